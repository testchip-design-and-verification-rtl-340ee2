// tb_allcell_group: a group with 2 instances per half and a 2-bit OLT data
// counter. Checks normal-mode outputs of both halves, a full OLT loop
// (BEND period 2*4*4*12+1 = 385 clocks) with no BBAD for identical halves,
// and BBAD after one R90 output is forced to a wrong value.
`include "tb_util.svh"
`include "tb_model.svh"
module tb_allcell_group;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, olt_en = 0;
  logic [CUT_W-1:0] cut_data1, cut_data2;
  logic [MUXCTL_W-1:0] mux_ctrl;
  ctrl_t ctrl; test_ctrl_t tctrl; logic [7:0] dout; logic scan_out, bbad, bend;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  allcell_group #(.NINST(2), .OLT_DATA_W(2)) dut (.cp({clk, clk}), .*);
  int bend_t [$]; int cyc = 0;
  always @(posedge clk) begin cyc++; if (bend) bend_t.push_back(cyc); end
  initial begin
    ctrl = '0; tctrl = '0; cut_data1 = '0; cut_data2 = 10'b11; mux_ctrl = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      int c = $urandom_range(0, 11);
      @(negedge clk);
      cut_data1 = CUT_W'($urandom); mux_ctrl = '0; mux_ctrl[3:0] = 4'(c); #1;
      for (int k = 0; k < 4; k++)
        `CHECK(dout[2*k] == model_combo(c, cut_data1[2:0]), "normal mode output");
    end
    @(negedge clk); olt_en = 1;
    repeat (900) @(posedge clk); #1;
    `CHECK(bend_t.size() >= 2, "two OLT loops");
    if (bend_t.size() >= 2) `CHECK(bend_t[1] - bend_t[0] == 385, $sformatf("loop %0d", bend_t[1] - bend_t[0]));
    `CHECK(bbad == 0, "identical halves pass");
    force dut.d90[0] = 1'b1;
    repeat (400) @(posedge clk); #1;
    `CHECK(bbad == 1, "forced R90 fault flagged");
    release dut.d90[0];
    `TB_FINISH
  end
endmodule
