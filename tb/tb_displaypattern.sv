// tb_displaypattern: end-to-end test of the bitmap filter and display
// pipeline, at a reduced screen (16x10) and image (200 pixels, more than
// the screen holds), with the three builds side by side: original, blur
// and emboss. Every pixel written to video RAM is checked against a
// reference filter of the test image. It also counts the mechanisms of the
// design and fails if any never occurred: FIFO full, a burst rewound on
// full, the display side stalled by user_access_ok, the filter holding
// while no pixel arrives, the final partial FIFO load released by
// last_data, and the address counter stopping at the corner of the screen.
module tb_displaypattern;
  import photoshop_pkg::*;

  localparam int H = 16, V = 10, NUM = 200;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-build counters
  int n_full [3], n_rewind [3], n_stall [3], n_hold [3], n_lastdrain [3], n_stop [3];
  int e_checks [3], e_fail [3], e_writes [3];
  logic e_done [3];

  for (genvar m = 0; m < 3; m++) begin : g_mode
    localparam filter_mode_e MODE = filter_mode_e'(m);
    logic [18:0] zbt_addr, vram_addr;
    logic        zbt_rd_en, user_access_ok, vram_we, last_data, rewind, frame_done;
    bmp_pixel_t  zbt_rdata, vram_wdata;
    logic        full_q = 0;

    displaypattern #(.FILTER(MODE), .H(H), .V(V), .NUM_PIXELS(NUM)) dut (.*);

    dp_env #(.MODE(MODE), .FRAME(H * V), .NUM(NUM)) env (
      .clk, .rst, .zbt_addr, .zbt_rd_en, .zbt_rdata, .user_access_ok,
      .vram_we, .vram_addr, .vram_wdata, .last_data,
      .done(e_done[m]), .checks(e_checks[m]), .failures(e_fail[m]), .writes(e_writes[m]), .out_sum());

    initial begin
      n_full[m] = 0; n_rewind[m] = 0; n_stall[m] = 0;
      n_hold[m] = 0; n_lastdrain[m] = 0; n_stop[m] = 0;
    end

    always @(posedge clk) if (!rst) begin
      if (dut.fifo_full && !full_q) n_full[m]++;
      full_q <= dut.fifo_full;
      if (rewind) n_rewind[m]++;
      if (int'(dut.u_fifo2disp.state_q) == 1 && !dut.fifo_empty && !user_access_ok) n_stall[m]++;
      if (!last_data && !dut.fifo_wr_en) n_hold[m]++;
      if (int'(dut.u_fifo2disp.state_q) == 0 && last_data && !dut.fifo_full && !dut.fifo_empty) n_lastdrain[m]++;
      if (dut.data_valid && frame_done) n_stop[m]++;
    end
  end

  task automatic need(input int n, input string what, input int m);
    checks++;
    if (n == 0) begin failures++; $display("FAIL build %0d: %s never happened", m, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (e_done[0] && e_done[1] && e_done[2]);
    for (int m = 0; m < 3; m++) begin
      checks += e_checks[m];
      failures += e_fail[m];
      need(n_full[m], "FIFO full", m);
      need(n_rewind[m], "burst rewound on full", m);
      need(n_stall[m], "display stall on user_access_ok", m);
      need(n_hold[m], "filter hold", m);
      need(n_lastdrain[m], "last_data drain of a partial FIFO", m);
      need(n_stop[m], "address counter stop at the screen corner", m);
      checks++;
      if (e_writes[m] != H * V) begin failures++; $display("FAIL build %0d wrote %0d", m, e_writes[m]); end
      $display("build %0d: writes=%0d full=%0d rewinds=%0d stalls=%0d holds=%0d lastdrain=%0d dropped_past_corner=%0d",
               m, e_writes[m], n_full[m], n_rewind[m], n_stall[m], n_hold[m], n_lastdrain[m], n_stop[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
