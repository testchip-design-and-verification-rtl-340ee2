// tb_fdd_block: 8 chained FDD units. In test mode with scan enable the 36
// cell chains shift: a word entered on TI appears on QOUT after 8 clocks on
// the single-edge cells; the dual-edge cells (every third cell, starting at
// 0) shift two units per clock, so there it appears after 4 clocks.
// The reference chain (8 flops) shifts too, and MUXOUT of unit 0 follows the
// bypass mux.
`include "tb_util.svh"
module tb_fdd_block;
  import tc_pkg::*;
  `TB_COUNTERS
  localparam int N = 8;
  logic cp = 0, tm = 1, sleep = 0;
  logic [CUT_W-1:0] cut_data1 = '0, cut_data2 = '0;
  logic [MUXCTL_W-1:0] mux_ctrl = '0; ctrl_t ctrl = '0; test_ctrl_t tctrl = '0;
  logic [35:0] ti_in, qout; logic muxout0, ref_scan_out;
  logic [35:0] words [N]; logic [N-1:0] rpat;
  logic [35:0] det;
  initial for (int i = 0; i < 36; i++) det[i] = (i % 3 == 0);
  `TB_WATCHDOG(cp, 2000)
  fdd_block #(.NUNIT(N), .NCELL(36)) dut (.*);
  task automatic pulse(); #2 cp = 1; #2 cp = 0; #2; endtask
  initial begin
    cut_data2[CD2_RSTN] = 1; cut_data2[CD2_FTE] = 1; tctrl.te = 1; rpat = 8'($urandom);
    for (int i = 0; i < N; i++) begin
      words[i] = {4'($urandom), $urandom}; ti_in = words[i]; tctrl.ti = rpat[i]; pulse();
    end
    for (int i = 0; i < N; i++) begin
      `CHECK((qout & ~det) == (words[i] & ~det), $sformatf("single-edge chains word %0d", i));
      `CHECK((qout & det) == ((i < N / 2 ? words[i + N / 2] : 36'b0) & det), $sformatf("dual-edge chains word %0d", i));
      `CHECK(ref_scan_out == rpat[i], "reference chain");
      ti_in = '0; tctrl.ti = 0; pulse();
    end
    ctrl = '{bypass_sel: 1, bypass_data: 1}; #1 `CHECK(muxout0 == 1, "bypass");
    ctrl = '0; mux_ctrl[13:8] = 6'd5; ti_in = 36'd1 << 5; pulse(); #1 `CHECK(muxout0 == 1, "unit 0 cell 5");
    `TB_FINISH
  end
endmodule
