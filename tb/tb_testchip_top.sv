// tb_testchip_top: end-to-end test of the test chip at reduced sizes
// (2 instances per half, 2-bit OLT counter, 8 FDD and 4 retention units).
`include "tb_util.svh"
`include "tb_model.svh"
module tb_testchip_top;
  localparam int NGROUP = 2, NINST = 2, OLT_W = 2, FDD_N = 8, RET_N = 4;
  `include "tb_top_body.svh"
  `TB_WATCHDOG(clk_in[0], 200000)
  testchip_top #(.NINST(NINST), .OLT_DATA_W(OLT_W), .FDD_NUNIT(FDD_N), .RET_NUNIT(RET_N)) dut (.*);
endmodule
