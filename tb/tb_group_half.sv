// tb_group_half: one orientation with 4 library instances. Every instance
// must deliver the same selected output on its own dout pair, and the scan
// chain must be 4 x 20 reference flops long.
`include "tb_util.svh"
`include "tb_model.svh"
module tb_group_half;
  import tc_pkg::*;
  `TB_COUNTERS
  logic [1:0] cp = '0;
  logic [CUT_W-1:0] cut_data1, cut_data2;
  logic [MUXCTL_W-1:0] mux_ctrl;
  ctrl_t ctrl; test_ctrl_t tctrl; logic [7:0] dout; logic scan_out;
  `TB_WATCHDOG(cp[1], 3000)
  group_half #(.NINST(4)) dut (.*);
  task automatic clk_both(); #2 cp = 2'b11; #2 cp = 2'b00; #1; endtask
  logic [79:0] pat;
  initial begin
    ctrl = '0; tctrl = '0; cut_data1 = '0; cut_data2 = 10'b11; mux_ctrl = '0; #1;
    for (int i = 0; i < 50; i++) begin
      int c = $urandom_range(0, 11);
      cut_data1 = CUT_W'($urandom); mux_ctrl = '0; mux_ctrl[3:0] = 4'(c); #1;
      for (int k = 0; k < 4; k++)
        `CHECK(dout[2*k] == model_combo(c, cut_data1[2:0]), $sformatf("inst %0d", k));
    end
    pat = {$urandom, $urandom, 16'($urandom)};
    tctrl.te = 1;
    for (int i = 0; i < 80; i++) begin tctrl.ti = pat[i]; clk_both(); end
    for (int i = 0; i < 80; i++) begin `CHECK(scan_out == pat[i], "scan 80"); tctrl.ti = 0; clk_both(); end
    `TB_FINISH
  end
endmodule
