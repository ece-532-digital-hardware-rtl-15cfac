// photoshop_pkg: types and constants shared by the image filter pipeline.
//
// A pixel travels as one 32-bit word, exactly as it sits in a 32-bit bitmap
// file in ZBT RAM: blue in the low byte, then green, then red, and an unused
// pad byte on top. The 24 colour bits are filtered channel by channel; the
// pad byte is passed along as zero.
//
// The screen is 640x480, so the video RAM address counter stops at
// 640*480 = 0x4B000 words.
package photoshop_pkg;

  // Which filter a build of the design carries. Blur and emboss are separate
  // builds of the same top; FILT_NONE shows the original image.
  typedef enum logic [1:0] {
    FILT_NONE   = 2'd0,
    FILT_BLUR   = 2'd1,
    FILT_EMBOSS = 2'd2
  } filter_mode_e;

  // One bitmap pixel as stored in a 32-bit little-endian word.
  typedef struct packed {
    logic [7:0] pad;
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } bmp_pixel_t;

  localparam int unsigned PIXEL_W = 32;   // ZBT word and FIFO width
  localparam int unsigned H_RES   = 640;
  localparam int unsigned V_RES   = 480;
  localparam int unsigned FRAME_PIXELS = H_RES * V_RES;  // 0x4B000
  localparam int unsigned ZBT_ADDR_W   = 19;             // 512K-word ZBT bank

  // Gaussian blur: 9 taps (8th order), even-symmetric, unsigned 8-bit.
  // Binomial coefficients C(8,k); they sum to 256, so the normalising
  // division is a right shift by 8 and the output always fits 8 bits.
  localparam int unsigned BLUR_TAPS  = 9;
  localparam int unsigned BLUR_SHIFT = 8;
  typedef logic [7:0] blur_coef_t [BLUR_TAPS];
  localparam blur_coef_t BLUR_COEFS = '{8'd1, 8'd8, 8'd28, 8'd56, 8'd70,
                                        8'd56, 8'd28, 8'd8, 8'd1};

  // Emboss: 6th order IIR, signed coefficients with EMB_FRAC fraction bits.
  // Numerator b0..b6, denominator a1..a6 (y[n] = sum b_k x[n-k] + sum a_k y[n-k]).
  // Coefficients left at zero are absent taps.
  localparam int unsigned EMB_ORDER = 6;
  localparam int unsigned EMB_FRAC  = 8;
  localparam int unsigned EMB_COEF_W = 12;
  typedef logic signed [EMB_COEF_W-1:0] emb_coef_t [EMB_ORDER+1];
  // x[n] - x[n-1] : horizontal gradient, the relief of the emboss
  localparam emb_coef_t EMB_B = '{12'sd256, -12'sd256, 12'sd0, 12'sd0,
                                  12'sd0, 12'sd0, 12'sd0};
  // index 0 unused; a1 = 0.25 keeps a short, stable decay behind each edge
  localparam emb_coef_t EMB_A = '{12'sd0, 12'sd64, 12'sd0, 12'sd0,
                                  12'sd0, 12'sd0, 12'sd0};
  localparam int EMB_OFFSET = 128;  // flat areas come out mid grey

endpackage
