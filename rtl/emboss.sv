// emboss: emboss (relief) filter for one 8-bit colour channel.
//
// A 6th order IIR high pass in direct form I:
//   v[n] = sum_{k=0..6} B[k]*x[n-k] + sum_{k=1..6} A[k]*v[n-k]
// with signed fixed-point coefficients of FRAC fraction bits; the sum is
// rounded (halves up) back to an integer. Rounding rather than truncating
// matters in the feedback: a truncated -1 would never decay to zero and
// would leave flat areas one step below grey. A high pass
// turns the flat parts of the image to zero and keeps the edges; adding
// OFFSET (mid grey) and clipping to 0..255 gives the raised/sunken look of an
// emboss. Coefficients set to zero are taps that are not there. The feedback
// history v is kept unclipped but saturated to STATE_W bits, so a badly
// chosen coefficient set cannot wrap around.
//
// Interface and timing: like gblur, the filter advances only on a clock edge
// where `en` (the FIFO write enable) is high and holds otherwise. `dout` is
// combinational from `din` and the stored history and belongs to that same
// input sample. Reset is synchronous and active high and clears all history.
//
// The order, the IIR structure with numerator and denominator terms, the
// 8-bit channel, enable and reset follow the design description. The
// coefficient values (B = 1, -1 : a horizontal gradient; A1 = 0.25) and the
// grey offset are this design's choice.
module emboss
  import photoshop_pkg::*;
#(
  parameter int unsigned ORDER   = EMB_ORDER,
  parameter int unsigned FRAC    = EMB_FRAC,
  parameter int unsigned COEF_W  = EMB_COEF_W,
  parameter int unsigned STATE_W = 16,
  parameter logic signed [COEF_W-1:0] B [ORDER+1] = EMB_B,
  parameter logic signed [COEF_W-1:0] A [ORDER+1] = EMB_A,
  parameter int          OFFSET  = EMB_OFFSET
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  localparam int unsigned ACC_W = COEF_W + STATE_W + 4;
  localparam logic signed [ACC_W-1:0] SMAX = ACC_W'((1 <<< (STATE_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] SMIN = -ACC_W'(1 <<< (STATE_W-1));

  logic        [7:0]         xh [ORDER];  // xh[k] = x[n-1-k]
  logic signed [STATE_W-1:0] vh [ORDER];  // vh[k] = v[n-1-k]

  localparam logic signed [ACC_W-1:0] ROUND = ACC_W'(1 <<< (FRAC-1));

  logic signed [ACC_W-1:0] acc, v, vsat, y;

  always_comb begin
    acc = ACC_W'(B[0]) * $signed({1'b0, din});
    for (int k = 1; k <= ORDER; k++) begin
      acc += ACC_W'(B[k]) * $signed({1'b0, xh[k-1]});
      acc += ACC_W'(A[k]) * ACC_W'(vh[k-1]);
    end
    v    = (acc + ROUND) >>> FRAC;
    vsat = (v > SMAX) ? SMAX : (v < SMIN) ? SMIN : v;
    y    = vsat + ACC_W'(OFFSET);
    dout = (y < 0) ? 8'h00 : (y > 255) ? 8'hFF : y[7:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < ORDER; k++) begin
        xh[k] <= '0;
        vh[k] <= '0;
      end
    end else if (en) begin
      xh[0] <= din;
      vh[0] <= vsat[STATE_W-1:0];
      for (int k = 1; k < ORDER; k++) begin
        xh[k] <= xh[k-1];
        vh[k] <= vh[k-1];
      end
    end
  end

endmodule
