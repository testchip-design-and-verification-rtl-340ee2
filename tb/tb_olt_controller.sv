// tb_olt_controller: OLT FSM with DATA_W=2 and NCELL=3, so one loop has
// 4 data values x 4 types x 3 cells = 48 settings of 2 clocks plus the END
// clock: 97 clocks between BEND pulses. The halves' outputs are modelled
// here as a function of the applied settings (equal for R0 and R90 unless a
// fault is injected). Checks pass-through without OLT, the sequence of
// applied settings, the loop length, BEND, and BBAD on an injected mismatch.
`include "tb_util.svh"
module tb_olt_controller;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, olt_en = 0;
  logic [CUT_W-1:0] cut_data1_i, cut_data2_i, cut_data1, cut_data2;
  logic [MUXCTL_W-1:0] mux_ctrl_i, mux_ctrl;
  ctrl_t ctrl_i, ctrl; test_ctrl_t tctrl_i, tctrl;
  logic [1:0] dout1, dout2; logic bbad, bend;
  logic inject = 0;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  olt_controller #(.NINST(1), .DATA_W(2), .NCELL(3)) dut (.*);
  // outputs of the halves: a function of data and select
  assign dout1 = {cut_data1[0] ^ mux_ctrl[10], cut_data1[1] & mux_ctrl[0]};
  assign dout2 = dout1 ^ {1'b0, inject};
  int bend_t [$];
  int cyc = 0;
  always @(posedge clk) begin cyc++; if (bend) bend_t.push_back(cyc); end
  int step;
  initial begin
    cut_data1_i = 10'h2AA; cut_data2_i = 10'h155; mux_ctrl_i = 14'h1234;
    ctrl_i = '{bypass_sel: 1, bypass_data: 1}; tctrl_i = '{te: 1, ti: 1};
    repeat (2) @(posedge clk); rst_n = 1; #1;
    `CHECK(cut_data1 == cut_data1_i && mux_ctrl == mux_ctrl_i && ctrl == ctrl_i && tctrl == tctrl_i, "pass-through");
    @(negedge clk); olt_en = 1;
    #1 `CHECK(tctrl.te == 0 && ctrl.bypass_sel == 0 && cut_data2 == cut_data2_i, "OLT forces TE/bypass off");
    // follow the settings: each is held for 2 clocks in APPLY/COMPARE
    @(posedge clk); // IDLE -> APPLY
    step = 0;
    for (int d = 0; d < 4; d++) for (int t = 0; t < 4; t++) for (int c = 0; c < 3; c++) begin
      @(negedge clk);
      `CHECK(cut_data1[1:0] == 2'(d) && cut_data1[9:2] == cut_data1_i[9:2] &&
             mux_ctrl[11:10] == 2'(t) && mux_ctrl[3:0] == 4'(c), $sformatf("setting %0d", step));
      step++;
      @(negedge clk);
    end
    repeat (200) @(posedge clk);
    `CHECK(bend_t.size() >= 2, "bend seen twice");
    if (bend_t.size() >= 2) `CHECK(bend_t[1] - bend_t[0] == 97, $sformatf("loop length %0d", bend_t[1] - bend_t[0]));
    `CHECK(bbad == 0, "no bbad without fault");
    // inject a mismatch on one output bit
    @(negedge clk); inject = 1;
    repeat (4) @(posedge clk); #1;
    `CHECK(bbad == 1, "bbad on mismatch");
    inject = 0; repeat (100) @(posedge clk); #1;
    `CHECK(bbad == 1, "bbad sticky");
    @(negedge clk); olt_en = 0; @(posedge clk); #1;
    `CHECK(bbad == 0 && bend == 0, "cleared when OLT ends");
    `TB_FINISH
  end
endmodule
