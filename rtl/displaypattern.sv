// displaypattern: bitmap filter and display pipeline (top level).
//
// A 32-bit bitmap, rows stored top-down, already sits in ZBT RAM bank 0.
// Right after reset the design streams it, one pixel per clock, through a
// filter and into a 32x32 FIFO; from there the pixels are written to the
// video RAM of the SVGA display controller, which shows them on a 640x480
// screen. The parts:
//
//   ZBT read port --> pixel_filter --> mem_fifo --> video RAM write port
//        ^                 ^ en           |  ^
//   mem2fifo_ctrl ---------+--------------+  fifo2disp_ctrl
//   (reads, stops and rewinds on full,       (drains on full or last_data
//    last_data at the end)                    while user_access_ok)
//
// The video RAM address counter here steps on every pixel written and stops
// at H_RES*V_RES (0x4B000 for 640x480): pixels past the bottom-right corner
// are not written, and `frame_done` is raised.
//
// Interfaces:
//  - ZBT bank 0 read port: `zbt_addr`/`zbt_rd_en` out; the word read comes
//    back on `zbt_rdata` RD_LATENCY clocks later (memory controller and RAM
//    pipeline together). Writes to bank 0 are never made.
//  - Video RAM user port of the display controller: `user_access_ok` in (a
//    grant for the next clock); `vram_we`, `vram_addr`, `vram_wdata` out.
//    `vram_we` comes one clock after a granted FIFO read.
//  - `rst` is synchronous, active high; one clock `clk` for everything.
//
// Following the design description: the block structure, the ZBT read
// latency of four clocks, the 32x32 FIFO, the three-channel filter, the
// address counter that stops at 0x4B000 and the separate builds for original,
// blur and emboss (the FILTER parameter; Gaussian blur is the default). The
// ZBT and SVGA controllers themselves are outside this RTL; their user-side
// signals are the ports above.
module displaypattern
  import photoshop_pkg::*;
#(
  parameter filter_mode_e FILTER      = FILT_BLUR,
  parameter int unsigned  H          = H_RES,
  parameter int unsigned  V          = V_RES,
  parameter int unsigned  NUM_PIXELS = H_RES * V_RES,
  parameter int unsigned  BASE_ADDR  = 0,
  parameter int unsigned  RD_LATENCY = 4,
  parameter int unsigned  FIFO_DEPTH = 32,
  parameter int unsigned  ADDR_W     = ZBT_ADDR_W,
  parameter int unsigned  VADDR_W    = 19
) (
  input  logic               clk,
  input  logic               rst,
  // ZBT RAM bank 0, read side
  output logic [ADDR_W-1:0]  zbt_addr,
  output logic               zbt_rd_en,
  input  bmp_pixel_t         zbt_rdata,
  // SVGA controller video RAM, user write side
  input  logic               user_access_ok,
  output logic               vram_we,
  output logic [VADDR_W-1:0] vram_addr,
  output bmp_pixel_t         vram_wdata,
  // status
  output logic               last_data,
  output logic               rewind,      // a burst was cut off by a full FIFO
  output logic               frame_done
);

  localparam int unsigned FRAME = H * V;

  logic       fifo_wr_en, fifo_rd_en, fifo_full, fifo_empty;
  logic       data_valid;
  bmp_pixel_t filt_pix;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  mem2fifo_ctrl #(
    .ADDR_W(ADDR_W), .NUM_PIXELS(NUM_PIXELS),
    .BASE_ADDR(BASE_ADDR), .RD_LATENCY(RD_LATENCY)
  ) u_mem2fifo (
    .clk, .rst,
    .ram_addr  (zbt_addr),
    .ram_rd_en (zbt_rd_en),
    .fifo_full, .fifo_empty, .fifo_wr_en,
    .last_data, .rewind
  );

  pixel_filter #(.MODE(FILTER)) u_filter (
    .clk, .rst,
    .en   (fifo_wr_en),
    .din  (zbt_rdata),
    .dout (filt_pix)
  );

  mem_fifo #(.WIDTH(PIXEL_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .din   (filt_pix),
    .wr_en (fifo_wr_en),
    .rd_en (fifo_rd_en),
    .dout  (vram_wdata),
    .full  (fifo_full),
    .empty (fifo_empty),
    .count (fifo_count)
  );

  fifo2disp_ctrl u_fifo2disp (
    .clk, .rst,
    .fifo_full, .fifo_empty, .last_data, .user_access_ok,
    .fifo_rd_en, .data_valid
  );

  // Video RAM address counter: one step per pixel written, stops at the
  // bottom-right corner of the screen.
  assign frame_done = (vram_addr >= VADDR_W'(FRAME));
  assign vram_we    = data_valid && !frame_done;

  always_ff @(posedge clk) begin
    if (rst)          vram_addr <= '0;
    else if (vram_we) vram_addr <= vram_addr + 1'b1;
  end

endmodule
