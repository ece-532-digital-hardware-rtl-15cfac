// mem2fifo_ctrl: moves the bitmap from ZBT RAM bank 0 through the filter into
// the FIFO.
//
// The controller issues one read per clock, walking the word address from
// BASE_ADDR over NUM_PIXELS pixels, until the FIFO is full. The ZBT path
// returns each word RD_LATENCY clocks after its read; the controller keeps a
// shift register of outstanding reads and raises `fifo_wr_en` exactly when
// a word arrives (that enable also steps the filter). When a word comes back
// while the FIFO is full it cannot be stored, and neither can the ones still
// in flight behind it: the controller stops reading, drops those returns,
// and sets the read address back to the first pixel that was not stored.
// It then waits for the display side to empty the FIFO and bursts again.
// After the last pixel is stored it raises `last_data` for good, so the FIFO
// reader drains a FIFO that will never fill again.
//
// States: BURST (reading), REFILL (rewound, waiting for an empty FIFO),
// DONE. Outputs `ram_rd_en` and `fifo_wr_en` are Mealy: they depend on
// `fifo_full` in the same clock.
//
// Following the design description: Mealy FSM, burst until full, write
// enable after the read latency of four clocks, stop and rewind the address
// counter on full, last-data flag. This design's choices: the rewind target
// is computed from a count of stored pixels, in-flight returns are dropped
// by clearing the outstanding-read register rather than counted, the burst
// restarts on an empty FIFO, and reading starts right after reset.
module mem2fifo_ctrl
  import photoshop_pkg::*;
#(
  parameter int unsigned ADDR_W     = ZBT_ADDR_W,
  parameter int unsigned NUM_PIXELS = FRAME_PIXELS,
  parameter int unsigned BASE_ADDR  = 0,
  parameter int unsigned RD_LATENCY = 4
) (
  input  logic              clk,
  input  logic              rst,
  // ZBT read port (controller + RAM, fixed latency)
  output logic [ADDR_W-1:0] ram_addr,
  output logic              ram_rd_en,
  // FIFO write side
  input  logic              fifo_full,
  input  logic              fifo_empty,
  output logic              fifo_wr_en,
  // to fifo2disp_ctrl
  output logic              last_data,
  // one-clock pulse when a burst is cut off by a full FIFO and rewound
  output logic              rewind
);

  localparam int unsigned CNT_W = $clog2(NUM_PIXELS + 1);

  typedef enum logic [1:0] {S_BURST, S_REFILL, S_DONE} state_e;

  state_e                state_q, state_d;
  logic [CNT_W-1:0]      rd_idx;      // next pixel to read
  logic [CNT_W-1:0]      wr_idx;      // pixels stored in the FIFO
  logic [RD_LATENCY-1:0] pending;     // pending[i]: a read issued i+1 clocks ago
  logic                  ret_valid;

  assign ret_valid = pending[RD_LATENCY-1];
  assign ram_addr  = ADDR_W'(BASE_ADDR) + ADDR_W'(rd_idx);
  assign last_data = (state_q == S_DONE);

  always_comb begin
    state_d    = state_q;
    ram_rd_en  = 1'b0;
    fifo_wr_en = 1'b0;
    rewind     = 1'b0;
    unique case (state_q)
      S_BURST: begin
        ram_rd_en  = !fifo_full && (rd_idx < CNT_W'(NUM_PIXELS));
        fifo_wr_en = ret_valid && !fifo_full;
        if (ret_valid && fifo_full) begin
          rewind  = 1'b1;
          state_d = S_REFILL;
        end else if (fifo_wr_en && (wr_idx == CNT_W'(NUM_PIXELS - 1))) begin
          state_d = S_DONE;
        end
      end
      S_REFILL: if (fifo_empty) state_d = S_BURST;
      S_DONE:   state_d = S_DONE;
      default:  state_d = S_BURST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_BURST;
      rd_idx  <= '0;
      wr_idx  <= '0;
      pending <= '0;
    end else begin
      state_q <= state_d;
      if (rewind) begin
        rd_idx  <= wr_idx;             // first pixel that was not stored
        pending <= '0;                 // drop everything still in flight
      end else begin
        if (ram_rd_en) rd_idx <= rd_idx + 1'b1;
        pending <= {pending[RD_LATENCY-2:0], ram_rd_en};
      end
      if (fifo_wr_en) wr_idx <= wr_idx + 1'b1;
    end
  end

  a_wr_not_full: assert property (@(posedge clk) disable iff (rst) fifo_wr_en |-> !fifo_full);

endmodule
