// tb_gblur: self-checking test of the Gaussian blur channel filter.
// Drives a random sample stream with a random enable and compares `dout`
// in every enabled clock against the 9-tap reference on the accepted
// history. Also checks the DC gain (a flat input comes out unchanged once
// the delay line is full), that the output holds while `en` is low, and
// that reset clears the history.
module tb_gblur;
  import tb_ref_pkg::*;

  logic       clk = 0, rst = 1, en = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  int hist [9];

  gblur dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(dout) != exp) begin
      failures++;
      $display("FAIL %s: dout=%0d expected=%0d", what, dout, exp);
    end
  endtask

  task automatic push_hist(input int x);
    for (int k = 8; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
  endtask

  initial begin
    for (int k = 0; k < 9; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // random stream with stalls
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = 8'($urandom);
      #1;
      if (en) begin
        int tmp [9];
        tmp[0] = din;
        for (int k = 1; k < 9; k++) tmp[k] = hist[k-1];
        check(blur_ref(tmp), "random");
        push_hist(din);
      end else begin
        logic [7:0] held;
        held = dout;
        @(posedge clk); #1;
        // history must not move: same input gives the same output
        checks++;
        if (dout != held) begin failures++; $display("FAIL hold"); end
      end
    end
    // flat field: after 9 equal samples the output equals the input
    for (int n = 0; n < 9; n++) begin
      @(negedge clk); en = 1; din = 8'd200; push_hist(200);
    end
    @(negedge clk); en = 1; din = 8'd200; #1;
    check(200, "dc gain");
    // impulse: the response is the coefficient row itself
    begin
      int imp [9] = '{1, 8, 28, 56, 70, 56, 28, 8, 1};
      @(negedge clk); rst = 1; en = 0;
      @(negedge clk); rst = 0; #1;
      check(0, "reset clears history");
      for (int n = 0; n < 9; n++) begin
        @(negedge clk); en = 1; din = (n == 0) ? 8'd255 : 8'd0; #1;
        check((imp[n] * 255) / 256, "impulse");
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
