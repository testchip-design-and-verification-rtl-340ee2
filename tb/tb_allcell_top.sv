// tb_allcell_top: ALLCELL with 2 groups of 2 instances per half. Checks the
// output block selection of every instance, bypass, the 160-flop scan chain
// through both groups, and one OLT loop in both groups (BEND, no BBAD).
`include "tb_util.svh"
`include "tb_model.svh"
module tb_allcell_top;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, olt_en = 0;
  logic [CUT_W-1:0] cut_data1, cut_data2;
  logic [MUXCTL_W-1:0] mux_ctrl;
  ctrl_t ctrl; test_ctrl_t tctrl; logic [7:0] o_sel;
  logic [1:0] dout, bbad, bend; logic scan_out;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  allcell_top #(.NGROUP(2), .NINST(2), .OLT_DATA_W(2)) dut (.cp({clk, clk}), .*);
  logic [159:0] pat; int nbend = 0;
  always @(posedge clk) if (bend == 2'b11) nbend++;
  initial begin
    ctrl = '0; tctrl = '0; cut_data1 = '0; cut_data2 = 10'b11; mux_ctrl = '0; o_sel = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      int c = $urandom_range(0, 11);
      @(negedge clk);
      cut_data1 = CUT_W'($urandom); mux_ctrl = '0; mux_ctrl[3:0] = 4'(c); o_sel = 8'(i % 8); #1;
      `CHECK(dout[0] == model_combo(c, cut_data1[2:0]), "muxout via o_block");
      @(negedge clk);
      `CHECK(dout[1] == model_combo(c, cut_data1[2:0]), "qout via o_block");
    end
    @(negedge clk); ctrl = '{bypass_sel: 1, bypass_data: 1}; #1 `CHECK(dout[0] == 1, "bypass");
    ctrl = '{bypass_sel: 1, bypass_data: 0}; #1 `CHECK(dout[0] == 0, "bypass 0");
    ctrl = '0;
    for (int w = 0; w < 5; w++) pat[w*32 +: 32] = $urandom;
    tctrl.te = 1;
    for (int i = 0; i < 160; i++) begin tctrl.ti = pat[i]; @(negedge clk); end
    for (int i = 0; i < 160; i++) begin `CHECK(scan_out == pat[i], "scan 160"); tctrl.ti = 0; @(negedge clk); end
    tctrl = '0; olt_en = 1;
    repeat (800) @(posedge clk); #1;
    `CHECK(nbend >= 2, "OLT loops in both groups");
    `CHECK(bbad == 2'b00, "no BBAD");
    `TB_FINISH
  end
endmodule
