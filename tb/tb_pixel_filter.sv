// tb_pixel_filter: self-checking test of the three-channel pixel filter in
// all three builds (original, blur, emboss), side by side on the same
// random pixel stream with a random enable. Each colour byte is checked
// against its own reference history, so a swapped or shared channel is
// caught; the pad byte must come out zero.
module tb_pixel_filter;
  import tb_ref_pkg::*;
  import photoshop_pkg::*;

  logic       clk = 0, rst = 1, en = 0;
  bmp_pixel_t din, d_none, d_blur, d_emb;
  int checks = 0, failures = 0;
  int hist [3][9];
  int x1 [3], v1 [3];

  pixel_filter #(.MODE(FILT_NONE))   u_none (.clk, .rst, .en, .din, .dout(d_none));
  pixel_filter #(.MODE(FILT_BLUR))   u_blur (.clk, .rst, .en, .din, .dout(d_blur));
  pixel_filter #(.MODE(FILT_EMBOSS)) u_emb  (.clk, .rst, .en, .din, .dout(d_emb));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int chan(bmp_pixel_t p, int c);
    return (c == 0) ? int'(p.r) : (c == 1) ? int'(p.g) : int'(p.b);
  endfunction

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    foreach (hist[c, k]) hist[c][k] = 0;
    foreach (x1[c]) begin x1[c] = 0; v1[c] = 0; end
    din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 4) != 0);
      din = bmp_pixel_t'($urandom);
      #1;
      if (en) begin
        chk(int'(d_none.pad), 0, "pad none");
        chk(int'(d_blur.pad), 0, "pad blur");
        chk(int'(d_emb.pad),  0, "pad emboss");
        for (int c = 0; c < 3; c++) begin
          int x;
          int tmp [9];
          int v;
          x = chan(din, c);
          tmp[0] = x;
          for (int k = 1; k < 9; k++) tmp[k] = hist[c][k-1];
          chk(chan(d_none, c), x, "original");
          chk(chan(d_blur, c), blur_ref(tmp), "blur");
          v = emboss_v(x, x1[c], v1[c]);
          chk(chan(d_emb, c), clip8(v + 128), "emboss");
          for (int k = 8; k > 0; k--) hist[c][k] = hist[c][k-1];
          hist[c][0] = x;
          x1[c] = x; v1[c] = v;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
