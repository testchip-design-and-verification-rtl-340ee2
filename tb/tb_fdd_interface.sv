// tb_fdd_interface: clock gating by block select (only the selected cell is
// clocked in normal mode, all cells in test mode), TI mapping from QOUT_P,
// and the Q/TQ output select.
`include "tb_util.svh"
module tb_fdd_interface;
  import tc_pkg::*;
  `TB_COUNTERS
  logic cp = 0, tm = 0;
  logic [MUXCTL_W-1:0] mux_ctrl = '0; logic [CUT_W-1:0] cut_data2 = '0;
  logic [35:0] qout_p, cell_q, cell_tq, cell_ti, gclk, muxin_qout;
  `TB_WATCHDOG(cp, 2000)
  fdd_interface #(.NCELL(36)) dut (.*);
  initial begin
    for (int i = 0; i < 40; i++) begin
      int s = $urandom_range(0, 35);
      tm = (i % 4 == 0);
      mux_ctrl[13:8] = 6'(s); #1 cp = 1; #1;
      `CHECK(gclk == (tm ? {36{1'b1}} : (36'd1 << s)), "gated clocks");
      cp = 0; #1 `CHECK(gclk == '0, "clocks low");
      qout_p = {4'($urandom), $urandom}; cell_q = {4'($urandom), $urandom}; cell_tq = ~cell_q;
      cut_data2[CD2_TQSEL] = i[0]; #1;
      `CHECK(cell_ti == qout_p, "TI mapping");
      `CHECK(muxin_qout == (i[0] ? cell_tq : cell_q), "Q/TQ select");
    end
    `TB_FINISH
  end
endmodule
