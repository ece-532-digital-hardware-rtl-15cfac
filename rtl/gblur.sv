// gblur: Gaussian blur filter for one 8-bit colour channel.
//
// An 8th order FIR low pass: nine even-symmetric unsigned 8-bit coefficients
// shaped like a Gaussian weight the current sample and the eight before it,
// and the sum is normalised back to 8 bits. Even symmetry gives the filter a
// linear phase, so the blur does not smear edges to one side. Three copies,
// one per colour, filter a pixel.
//
// Interface and timing: the filter advances only on a clock edge where `en`
// (the FIFO write enable) is high; otherwise its delay line holds, so the
// stream can stall at any point. `dout` is combinational from `din` and the
// eight stored samples: the value presented with `en` is the filtered sample
// for that same input, out[n] = (sum_k COEFS[k]*x[n-k]) >> SHIFT.
// Reset is synchronous and active high, and clears the delay line to zero.
//
// The order, the coefficient format, the symmetry, the hold-on-enable and the
// reset style follow the design description; the coefficient values (the
// binomial row C(8,k), summing to 256) and truncation on the final shift are
// this design's choice.
module gblur
  import photoshop_pkg::*;
#(
  parameter int unsigned TAPS  = BLUR_TAPS,
  parameter int unsigned SHIFT = BLUR_SHIFT,
  parameter logic [7:0]  COEFS [TAPS] = BLUR_COEFS
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  localparam int unsigned ACC_W = 16 + $clog2(TAPS);

  // hist[k] holds x[n-1-k]
  logic [7:0] hist [TAPS-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS-1; k++) hist[k] <= '0;
    end else if (en) begin
      hist[0] <= din;
      for (int k = 1; k < TAPS-1; k++) hist[k] <= hist[k-1];
    end
  end

  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] scaled;

  always_comb begin
    acc = ACC_W'(COEFS[0]) * ACC_W'(din);
    for (int k = 1; k < TAPS; k++)
      acc += ACC_W'(COEFS[k]) * ACC_W'(hist[k-1]);
    scaled = acc >> SHIFT;
    dout   = (scaled > ACC_W'(255)) ? 8'hFF : scaled[7:0];
  end

endmodule
