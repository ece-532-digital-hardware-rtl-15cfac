// tb_emboss: self-checking test of the emboss channel filter.
// Drives random and structured sample streams with a random enable and
// compares `dout` in every enabled clock with an integer model of the
// IIR recursion (gradient numerator, 0.25 feedback, +128, clip). Checks that
// a flat field settles to mid grey, that a rising step gives a bright ridge
// decaying through the feedback, that the output holds while `en` is low and
// that reset clears the state.
module tb_emboss;
  import tb_ref_pkg::*;

  logic       clk = 0, rst = 1, en = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  int x1, v1;     // model state: previous input and unclipped output

  emboss dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int x, input string what);
    int v;
    @(negedge clk);
    en = 1; din = 8'(x);
    #1;
    v = emboss_v(x, x1, v1);
    checks++;
    if (int'(dout) != clip8(v + 128)) begin
      failures++;
      $display("FAIL %s: x=%0d dout=%0d expected=%0d", what, x, dout, clip8(v + 128));
    end
    x1 = x; v1 = v;
  endtask

  initial begin
    x1 = 0; v1 = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 3) == 0) begin
        logic [7:0] held;
        @(negedge clk); en = 0; din = 8'($urandom); #1;
        held = dout;
        @(posedge clk); #1;
        checks++;
        if (dout != held) begin failures++; $display("FAIL hold"); end
      end else begin
        step(int'($urandom_range(0, 255)), "random");
      end
    end
    // flat field -> mid grey
    for (int n = 0; n < 12; n++) step(90, "flat");
    checks++;
    if (dout != 8'd128) begin failures++; $display("FAIL flat field gives %0d", dout); end
    // rising step: ridge of +100 then a decaying tail 25, 6, 1 (+128)
    step(190, "step edge");
    checks++;
    if (dout != 8'd228) begin failures++; $display("FAIL step edge %0d", dout); end
    step(190, "tail1");
    checks++;
    if (dout != 8'd153) begin failures++; $display("FAIL tail1 %0d", dout); end
    // reset clears the history
    @(negedge clk); rst = 1; en = 0;
    @(negedge clk); rst = 0; x1 = 0; v1 = 0;
    step(0, "after reset");
    checks++;
    if (dout != 8'd128) begin failures++; $display("FAIL reset %0d", dout); end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
