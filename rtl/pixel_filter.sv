// pixel_filter: filters one 32-bit bitmap pixel, channel by channel.
//
// The pixel word is split into its red, green and blue bytes and each byte
// goes through its own copy of the selected filter, so the three colours are
// filtered independently and in step. MODE chooses, per build, the Gaussian
// blur (gblur), the emboss (emboss) or no filter at all, which shows the
// original image. The pad byte of the output is zero.
//
// Timing: all filters step on `en` (the FIFO write enable) and their outputs
// are combinational from `din`, so `dout` belongs to the pixel on `din` in
// the same clock. Reset is synchronous, active high.
//
// Three filter copies per pixel and one build per filter follow the design
// description; carrying the choice as a parameter is this design's own.
module pixel_filter
  import photoshop_pkg::*;
#(
  parameter filter_mode_e MODE = FILT_BLUR
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  bmp_pixel_t din,
  output bmp_pixel_t dout
);

  logic [7:0] ch_in  [3];
  logic [7:0] ch_out [3];

  assign ch_in[0] = din.r;
  assign ch_in[1] = din.g;
  assign ch_in[2] = din.b;

  for (genvar c = 0; c < 3; c++) begin : g_ch
    if (MODE == FILT_BLUR) begin : g_blur
      gblur u_blur (.clk, .rst, .en, .din(ch_in[c]), .dout(ch_out[c]));
    end else if (MODE == FILT_EMBOSS) begin : g_emboss
      emboss u_emboss (.clk, .rst, .en, .din(ch_in[c]), .dout(ch_out[c]));
    end else begin : g_none
      assign ch_out[c] = ch_in[c];
    end
  end

  assign dout = '{pad: 8'h00, r: ch_out[0], g: ch_out[1], b: ch_out[2]};

endmodule
