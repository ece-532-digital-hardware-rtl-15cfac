// mem_fifo: 32-bit x 32-deep synchronous FIFO between the filter and the
// display controller.
//
// The filter can deliver a pixel on every clock, but the video RAM accepts a
// write only when the display controller grants access, so the filtered
// pixels wait here. Storage is a plain array with wrapping read and write
// pointers and an occupancy counter that yields `full` and `empty`.
//
// Interface and timing (one clock, synchronous active-high reset):
//  - a write happens on a rising edge with `wr_en` high and `full` low;
//  - a read happens on a rising edge with `rd_en` high and `empty` low, and
//    its word appears on `dout` after that edge, i.e. one clock after
//    `rd_en`, which is why the reader flops `rd_en` into a data-valid flag;
//  - `full` and `empty` are registered state and change the clock after
//    the access that changes them. A write to a full FIFO or a read from an
//    empty one is ignored (and flagged by an assertion).
// The width, depth and one-clock read latency follow the design description
// of the generated FIFO; the pointer/counter structure is this design's own.
module mem_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  input  logic             wr_en,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wptr, rptr;
  logic             do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);

  function automatic logic [PTR_W-1:0] ptr_inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      dout  <= '0;
    end else begin
      if (do_wr) wptr <= ptr_inc(wptr);
      if (do_rd) begin
        rptr <= ptr_inc(rptr);
        dout <= mem[rptr];
      end
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Users must respect the flags.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));

endmodule
