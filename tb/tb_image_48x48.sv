// tb_image_48x48: the filter evaluation picture, a 48x48 grayscale image,
// run through the whole pipeline (memory read, filter, FIFO, video RAM) on a
// 48x48 screen, once with the blur build and once with the emboss build.
// Every output pixel is checked against the reference filters. It also
// checks what the filters should do to a picture: the blur keeps the mean
// brightness (within the loss of truncation and the start-up ramp) and
// keeps R = G = B, and the emboss turns the flat background to mid grey.
module tb_image_48x48;
  import photoshop_pkg::*;

  localparam int W = 48, H = 48;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   e_checks [2], e_fail [2], e_writes [2], e_sum [2];
  logic e_done [2];
  bmp_pixel_t last_px [2];
  int   gray_ok [2], bg_grey [2];

  for (genvar m = 0; m < 2; m++) begin : g_mode
    localparam filter_mode_e MODE = (m == 0) ? FILT_BLUR : FILT_EMBOSS;
    logic [18:0] zbt_addr, vram_addr;
    logic        zbt_rd_en, user_access_ok, vram_we, last_data, rewind, frame_done;
    bmp_pixel_t  zbt_rdata, vram_wdata;

    displaypattern #(.FILTER(MODE), .H(W), .V(H), .NUM_PIXELS(W * H)) dut (.*);

    dp_env #(.MODE(MODE), .FRAME(W * H), .NUM(W * H), .PICTURE(1), .PIC_W(W), .PIC_H(H)) env (
      .clk, .rst, .zbt_addr, .zbt_rd_en, .zbt_rdata, .user_access_ok,
      .vram_we, .vram_addr, .vram_wdata, .last_data,
      .done(e_done[m]), .checks(e_checks[m]), .failures(e_fail[m]),
      .writes(e_writes[m]), .out_sum(e_sum[m]));

    initial begin gray_ok[m] = 1; bg_grey[m] = 0; end
    always @(posedge clk) if (vram_we) begin
      if (vram_wdata.r != vram_wdata.g || vram_wdata.g != vram_wdata.b) gray_ok[m] = 0;
      // first row lies on the flat background, after the start-up pixels
      if (vram_addr > 19'd10 && vram_addr < 19'(W) && vram_wdata.r == 8'd128) bg_grey[m]++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int in_sum = 0;
    for (int a = 0; a < W * H; a++) in_sum += int'(tb_ref_pkg::gray_disc_word(a, W, H) & 32'hFF);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (e_done[0] && e_done[1]);
    for (int m = 0; m < 2; m++) begin
      checks += e_checks[m];
      failures += e_fail[m];
      chk(e_writes[m] == W * H, "all pixels written");
      chk(gray_ok[m] == 1, "grayscale stays grayscale");
    end
    // blur: mean within 2 grey levels per pixel of the input mean
    chk(e_sum[0] <= in_sum && e_sum[0] >= in_sum - 2 * W * H, "blur keeps brightness");
    chk(bg_grey[1] > 0, "emboss flat background is mid grey");
    $display("input mean %0d.%02d, blurred mean %0d.%02d, emboss grey background pixels %0d",
             in_sum / (W * H), (in_sum * 100 / (W * H)) % 100,
             e_sum[0] / (W * H), (e_sum[0] * 100 / (W * H)) % 100, bg_grey[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
