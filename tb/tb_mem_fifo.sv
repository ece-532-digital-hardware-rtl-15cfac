// tb_mem_fifo: self-checking test of the 32x32 FIFO.
// Random writes and reads that obey the flags, checked against a queue:
// data order, `dout` valid one clock after a read, `full` exactly at 32
// words, `empty` at 0, and the occupancy count. It also fills the FIFO to
// the brim and drains it completely.
module tb_mem_fifo;
  logic        clk = 0, rst = 1;
  logic [31:0] din = 0, dout;
  logic        wr_en = 0, rd_en = 0, full, empty;
  logic [5:0]  count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  logic        rd_q = 0;
  logic [31:0] exp_q;

  mem_fifo dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One clock: choose accesses at the negedge, update the model at posedge.
  task automatic cycle(input bit want_wr, input bit want_rd);
    @(negedge clk);
    chk(full  == (q.size() == 32), "full flag");
    chk(empty == (q.size() == 0),  "empty flag");
    chk(int'(count) == q.size(),   "count");
    if (rd_q) chk(dout == exp_q, "read data");
    wr_en = want_wr && !full;
    rd_en = want_rd && !empty;
    din   = $urandom;
    @(posedge clk);
    rd_q = rd_en;
    if (rd_en) exp_q = q.pop_front();
    if (wr_en) q.push_back(din);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 4000; n++) begin
      int mode = (n / 500) % 3;  // write-heavy, balanced, read-heavy phases
      cycle($urandom_range(0, 9) < (mode == 0 ? 8 : mode == 1 ? 5 : 2),
            $urandom_range(0, 9) < (mode == 0 ? 2 : mode == 1 ? 5 : 8));
    end
    repeat (40) cycle(1, 0);
    chk(full, "filled to the brim");
    repeat (40) cycle(0, 1);
    cycle(0, 0);
    chk(empty, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
