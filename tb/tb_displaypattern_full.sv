// tb_displaypattern_full: one complete frame through the design at its
// default size: a 640x480 image (307,200 pixels) read from ZBT RAM,
// Gaussian-blurred, buffered in the 32x32 FIFO and written to video RAM
// under a display controller that withholds access part of the time. Every
// one of the 307,200 video RAM writes is checked against the reference
// filter; the test also reports how often the FIFO filled and a burst was
// rewound, and fails if that never happened.
module tb_displaypattern_full;
  import photoshop_pkg::*;

  logic        clk = 0, rst = 1;
  logic [18:0] zbt_addr, vram_addr;
  logic        zbt_rd_en, user_access_ok, vram_we, last_data, rewind, frame_done;
  bmp_pixel_t  zbt_rdata, vram_wdata;
  logic        env_done;
  int          env_checks, env_fail, env_writes;
  int checks = 0, failures = 0, rewinds = 0, cyc = 0;

  displaypattern dut (.*);

  dp_env env (
    .clk, .rst, .zbt_addr, .zbt_rd_en, .zbt_rdata, .user_access_ok,
    .vram_we, .vram_addr, .vram_wdata, .last_data,
    .done(env_done), .checks(env_checks), .failures(env_fail), .writes(env_writes), .out_sum());

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired after %0d cycles, %0d writes", cyc, env_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (rewind) rewinds++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (env_done);
    checks   = env_checks + 3;
    failures = env_fail;
    if (env_writes != FRAME_PIXELS) begin failures++; $display("FAIL wrote %0d pixels", env_writes); end
    if (rewinds == 0) begin failures++; $display("FAIL no burst was rewound"); end
    if (!frame_done) begin failures++; $display("FAIL frame_done not raised"); end
    $display("frame: %0d pixels in %0d cycles, %0d rewinds", env_writes, cyc, rewinds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
