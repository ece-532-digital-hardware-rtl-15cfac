// zbt_model: behavioural model of the read path of ZBT RAM bank 0 together
// with its memory controller, as seen from the user side: a word read at
// `addr` with `rd_en` appears on `rdata` LATENCY clocks later. The contents
// are a test picture from tb_ref_pkg (PICTURE selects which). When no read returns,
// `rdata` carries a junk pattern so that a design sampling it at the wrong
// clock is caught.
module zbt_model
  import tb_ref_pkg::*;
#(
  parameter int unsigned ADDR_W  = 19,
  parameter int unsigned LATENCY = 4,
  parameter int          PICTURE = 0,    // 0: test image, 1: grayscale disc
  parameter int unsigned PIC_W   = 48,
  parameter int unsigned PIC_H   = 48
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              rd_en,
  output logic [31:0]       rdata
);
  logic              vpipe [LATENCY];
  logic [ADDR_W-1:0] apipe [LATENCY];

  initial for (int i = 0; i < LATENCY; i++) vpipe[i] = 1'b0;

  always_ff @(posedge clk) begin
    vpipe[0] <= rd_en;
    apipe[0] <= addr;
    for (int i = 1; i < LATENCY; i++) begin
      vpipe[i] <= vpipe[i-1];
      apipe[i] <= apipe[i-1];
    end
  end

  assign rdata = vpipe[LATENCY-1] ? picture_word(PICTURE, int'(apipe[LATENCY-1]), PIC_W, PIC_H) : 32'hDEAD_BEEF;
endmodule
