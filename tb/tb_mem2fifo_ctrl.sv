// tb_mem2fifo_ctrl: self-checking test of the ZBT-to-FIFO controller.
// A ZBT read model with a four-clock latency feeds the controller's FIFO
// write side, which is modelled by a queue of CAP words drained at random.
// Checks: every stored word is the next pixel of the image in order (none
// lost or repeated across full-FIFO rewinds), no write while full, the
// first write arrives exactly four clocks after the first read, the read
// addresses stay inside the image, last_data rises only after the last
// pixel and holds, and at least one rewind happened.
module tb_mem2fifo_ctrl;
  import tb_ref_pkg::*;

  localparam int N    = 300;
  localparam int BASE = 16;
  localparam int CAP  = 8;

  logic        clk = 0, rst = 1;
  logic [18:0] ram_addr;
  logic        ram_rd_en, fifo_full = 0, fifo_empty = 1, fifo_wr_en, last_data, rewind;
  logic [31:0] rdata;
  int checks = 0, failures = 0;
  int q [$];
  int stored = 0, rewinds = 0, cyc = 0, first_rd = -1, first_wr = -1;
  bit drain = 0;

  mem2fifo_ctrl #(.NUM_PIXELS(N), .BASE_ADDR(BASE), .RD_LATENCY(4)) dut (.*);
  zbt_model #(.LATENCY(4)) u_ram (.clk, .addr(ram_addr), .rd_en(ram_rd_en), .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // FIFO model and checks, sampled at each rising edge
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (ram_rd_en) begin
      if (first_rd < 0) first_rd = cyc;
      chk(ram_addr >= 19'(BASE) && ram_addr < 19'(BASE + N), "read address in image");
      chk(!last_data, "no read after last_data");
    end
    if (rewind) rewinds++;
    if (fifo_wr_en) begin
      if (first_wr < 0) first_wr = cyc;
      chk(!fifo_full, "no write while full");
      chk(rdata == image_word(BASE + stored), "pixel order");
      q.push_back(stored);
      stored++;
    end
    chk(last_data == (stored == N && !fifo_wr_en) || (last_data && stored == N),
        "last_data only after the last pixel");
    // reader: drains in bursts once full, like the display side, plus
    // random single reads so that full arrives while reads are in flight
    if (fifo_full) drain = 1;
    if (q.size() > 0 && (drain ? ($urandom_range(0, 2) != 0) : ($urandom_range(0, 7) == 0)))
      void'(q.pop_front());
    if (q.size() == 0) drain = 0;
    fifo_full  <= (q.size() == CAP);
    fifo_empty <= (q.size() == 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (last_data);
    repeat (20) @(posedge clk);
    chk(stored == N, "all pixels stored");
    chk(last_data, "last_data holds");
    chk(first_wr - first_rd == 4, "four-clock read latency");
    chk(rewinds > 0, "full FIFO caused a rewind");
    $display("pixels=%0d rewinds=%0d latency=%0d cycles=%0d", stored, rewinds, first_wr - first_rd, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
