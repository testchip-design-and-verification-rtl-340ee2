// tb_fdd_unit: one FDD unit. In test mode with scan enable every cell loads
// its QOUT_P bit, visible on MUXIN_QOUT and, per select, on MUXOUT; in normal
// mode only the selected cell captures CUT_DATA1[0].
`include "tb_util.svh"
module tb_fdd_unit;
  import tc_pkg::*;
  `TB_COUNTERS
  logic cp = 0, tm = 0, sleep = 0;
  logic [CUT_W-1:0] cut_data1 = '0, cut_data2 = '0;
  logic [MUXCTL_W-1:0] mux_ctrl = '0;
  logic [35:0] qout_p, muxin_qout, prev; logic muxout;
  `TB_WATCHDOG(cp, 2000)
  fdd_unit #(.NCELL(36)) dut (.*);
  task automatic pulse(); #2 cp = 1; #2 cp = 0; #2; endtask
  initial begin
    cut_data2[CD2_RSTN] = 1; cut_data2[CD2_FTE] = 1; tm = 1;
    qout_p = {4'($urandom), $urandom}; #1; pulse();
    `CHECK(muxin_qout == qout_p, "test mode shift");
    for (int s = 0; s < 36; s++) begin mux_ctrl[13:8] = 6'(s); #1 `CHECK(muxout == qout_p[s], "fdd mux"); end
    tm = 0; cut_data2[CD2_FTE] = 0;
    for (int i = 0; i < 20; i++) begin
      int s = $urandom_range(0, 35);
      prev = muxin_qout; mux_ctrl[13:8] = 6'(s); cut_data1[0] = !prev[s]; #1; pulse();
      `CHECK(muxout == cut_data1[0], "selected cell captured");
      `CHECK((muxin_qout ^ prev) == (36'd1 << s), "only selected cell clocked");
    end
    `TB_FINISH
  end
endmodule
