// fifo2disp_ctrl: moves filtered pixels from the FIFO to the display
// controller's video RAM write port.
//
// The FSM idles until the FIFO reports full, or the memory side reports
// `last_data` (the final, partly filled load). It then reads one word on
// every clock in which the display controller grants user access
// (`user_access_ok`) until the FIFO is empty, and returns to idle. The FIFO
// presents a word one clock after its read enable, so `data_valid` is the
// read enable flopped once; it marks the clock in which `fifo_dout` holds a
// pixel to be written to video RAM.
//
// States: IDLE, DRAIN. `fifo_rd_en` is Mealy: in the clock the trigger
// arrives it can already read, and it follows `user_access_ok` and
// `fifo_empty` combinationally.
//
// Trigger, drain-until-empty, the user_access_ok gating and the flopped
// data_valid follow the design description; reading in the trigger clock and
// synchronous active-high reset are this design's choice.
module fifo2disp_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic fifo_full,
  input  logic fifo_empty,
  input  logic last_data,
  input  logic user_access_ok,
  output logic fifo_rd_en,
  output logic data_valid
);

  typedef enum logic {S_IDLE, S_DRAIN} state_e;

  state_e state_q, state_d;
  logic   active;

  always_comb begin
    active  = (state_q == S_DRAIN) || fifo_full || last_data;
    state_d = state_q;
    unique case (state_q)
      S_IDLE:  if ((fifo_full || last_data) && !fifo_empty) state_d = S_DRAIN;
      S_DRAIN: if (fifo_empty) state_d = S_IDLE;
      default: state_d = S_IDLE;
    endcase
    fifo_rd_en = active && user_access_ok && !fifo_empty;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q    <= S_IDLE;
      data_valid <= 1'b0;
    end else begin
      state_q    <= state_d;
      data_valid <= fifo_rd_en;
    end
  end

  // A read needs a grant and a word to read.
  a_rd_rules: assert property (@(posedge clk) disable iff (rst)
                               fifo_rd_en |-> (user_access_ok && !fifo_empty));

endmodule
