// tb_fifo2disp_ctrl: self-checking test of the FIFO-to-display controller.
// The controller reads a real 32x32 FIFO (mem_fifo) that the testbench
// fills in bursts, while user_access_ok is granted at random. Checks: no
// read before the FIFO has been full or last_data is up, no read without
// user_access_ok or from an empty FIFO, data_valid is the read enable one
// clock late, once triggered the FIFO is drained to empty, and every word
// comes out once and in order, including a final partial load that only
// last_data releases.
module tb_fifo2disp_ctrl;
  logic        clk = 0, rst = 1;
  logic [31:0] din = 0, dout;
  logic        wr_en = 0, fifo_rd_en, fifo_full, fifo_empty, last_data = 0;
  logic        user_access_ok = 0, data_valid;
  logic [5:0]  count;
  int checks = 0, failures = 0, cyc = 0;
  int sent = 0, got = 0, denied = 0, triggers = 0;
  bit armed = 0, rd_prev = 0;

  mem_fifo u_fifo (.clk, .rst, .din, .wr_en, .rd_en(fifo_rd_en), .dout,
                   .full(fifo_full), .empty(fifo_empty), .count);
  fifo2disp_ctrl dut (.*);

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

  always @(posedge clk) if (!rst) begin
    cyc++;
    chk(data_valid == rd_prev, "data_valid is read enable delayed");
    if (data_valid) begin
      chk(dout == 32'(got) * 32'h0101_0101, "data order");
      got++;
    end
    if (fifo_full || last_data) begin
      if (!armed) triggers++;
      armed = 1;
    end
    if (fifo_rd_en) begin
      chk(armed, "read only after full or last_data");
      chk(user_access_ok, "read only with user_access_ok");
      chk(!fifo_empty, "no read from empty FIFO");
    end else if (armed && !fifo_empty && !user_access_ok) denied++;
    else if (armed && !fifo_empty) chk(0, "triggered FIFO left undrained");
    if (fifo_empty) armed = 0;
    rd_prev = fifo_rd_en;
  end

  always @(negedge clk) user_access_ok <= ($urandom_range(0, 2) != 0);

  task automatic write_words(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (fifo_full) begin i--; wr_en = 0; continue; end
      wr_en = 1; din = 32'(sent) * 32'h0101_0101; sent++;
    end
    @(negedge clk) wr_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // 20 words do not fill the FIFO: nothing may be read yet
    write_words(20);
    repeat (30) @(posedge clk);
    chk(got == 0, "partial FIFO waits");
    // fill it: a full burst is drained
    write_words(12);
    repeat (5) begin
      wait (fifo_empty);
      write_words(32);
    end
    wait (fifo_empty);
    // final partial load released by last_data
    write_words(7);
    repeat (20) @(posedge clk);
    chk(got == sent - 7, "partial load held before last_data");
    @(negedge clk) last_data = 1;
    repeat (40) @(posedge clk);
    chk(got == sent, "all words delivered");
    chk(denied > 0, "user_access_ok stalled the transfer");
    $display("sent=%0d got=%0d triggers=%0d stalls=%0d", sent, got, triggers, denied);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
