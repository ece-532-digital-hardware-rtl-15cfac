// dp_env: environment around one displaypattern instance.
// Models the ZBT bank 0 read path (zbt_model) and the display controller's
// video RAM user port: user_access_ok is withheld in regular windows (as
// when the display side fetches pixels for the screen) and at random, and a
// write is accepted only if access was granted the clock before. Every
// video RAM write is checked, in order, against a reference filter run on
// the test image; `done` rises once the frame (or the whole image, if it is
// smaller) is written and the pipeline has gone quiet.
module dp_env
  import tb_ref_pkg::*;
  import photoshop_pkg::*;
#(
  parameter filter_mode_e MODE  = FILT_BLUR,
  parameter int unsigned  FRAME = 640 * 480,
  parameter int unsigned  NUM   = 640 * 480,
  parameter int unsigned  BASE  = 0,
  parameter int           PICTURE = 0,   // 0: test image, 1: grayscale disc
  parameter int unsigned  PIC_W = 48,
  parameter int unsigned  PIC_H = 48
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [18:0] zbt_addr,
  input  logic        zbt_rd_en,
  output logic [31:0] zbt_rdata,
  output logic        user_access_ok,
  input  logic        vram_we,
  input  logic [18:0] vram_addr,
  input  logic [31:0] vram_wdata,
  input  logic        last_data,
  output logic        done,
  output int          checks,
  output int          failures,
  output int          writes,
  output int          out_sum      // sum of all written red values
);
  zbt_model #(.LATENCY(4), .PICTURE(PICTURE), .PIC_W(PIC_W), .PIC_H(PIC_H)) u_ram (.clk, .addr(zbt_addr), .rd_en(zbt_rd_en), .rdata(zbt_rdata));

  int  hist [3][9];
  int  x1 [3], v1 [3];
  int  cyc = 0, quiet = 0;
  bit  ok_prev = 0;
  localparam int unsigned EXPECT = (NUM < FRAME) ? NUM : FRAME;

  initial begin
    checks = 0; failures = 0; writes = 0; done = 0; out_sum = 0;
    foreach (hist[c, k]) hist[c][k] = 0;
    foreach (x1[c]) begin x1[c] = 0; v1[c] = 0; end
  end

  always @(negedge clk)
    user_access_ok <= ((cyc % 100) >= 20) && ($urandom_range(0, 3) != 0);

  function automatic int chan(logic [31:0] w, int c);
    return (c == 0) ? int'(w[23:16]) : (c == 1) ? int'(w[15:8]) : int'(w[7:0]);
  endfunction

  task automatic chk(input bit good, input string what);
    checks++;
    if (!good) begin
      failures++;
      if (failures < 10) $display("FAIL [%s] %s at write %0d", MODE.name(), what, writes);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (vram_we) begin
      logic [31:0] src;
      int          e [3];
      src = picture_word(PICTURE, BASE + writes, PIC_W, PIC_H);
      for (int c = 0; c < 3; c++) begin
        int x, v;
        int tmp [9];
        x = chan(src, c);
        tmp[0] = x;
        for (int k = 1; k < 9; k++) tmp[k] = hist[c][k-1];
        v = emboss_v(x, x1[c], v1[c]);
        e[c] = (MODE == FILT_BLUR) ? blur_ref(tmp) : (MODE == FILT_EMBOSS) ? clip8(v + 128) : x;
        for (int k = 8; k > 0; k--) hist[c][k] = hist[c][k-1];
        hist[c][0] = x;
        x1[c] = x; v1[c] = v;
      end
      chk(ok_prev, "write granted by user_access_ok");
      chk(int'(vram_addr) == writes, "video RAM address");
      chk(vram_wdata == {8'h00, 8'(e[0]), 8'(e[1]), 8'(e[2])}, "filtered pixel");
      out_sum += int'(vram_wdata[23:16]);
      writes++;
      quiet = 0;
    end else quiet++;
    ok_prev = user_access_ok;
    if (!done && writes >= EXPECT && last_data && quiet > 100) begin
      done = 1;
      chk(writes == EXPECT, "pixel count");
    end
    if (writes > EXPECT) chk(0, "write past the end of the screen");
  end
endmodule
