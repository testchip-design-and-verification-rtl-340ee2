// tb_lib_block: one library instance. Checks the output selection over
// cell type (MUX_CTRL[11:10]) and cell (MUX_CTRL[3:0]) for COMBO, SEQ, TRI
// and CBUF cells, and that the four units form one 20-flop scan chain.
`include "tb_util.svh"
`include "tb_model.svh"
module tb_lib_block;
  import tc_pkg::*;
  `TB_COUNTERS
  logic [1:0] cp = '0;
  logic [CUT_W-1:0] cut_data1, cut_data2;
  logic [MUXCTL_W-1:0] mux_ctrl;
  ctrl_t ctrl; logic te, scan_in; logic [1:0] dout; logic scan_out;
  `TB_WATCHDOG(cp[1], 3000)
  lib_block dut (.*);
  task automatic clk_both(); #2 cp = 2'b11; #2 cp = 2'b00; #1; endtask
  task automatic set_sel(int t, int c); mux_ctrl = '0; mux_ctrl[11:10] = 2'(t); mux_ctrl[3:0] = 4'(c); #1; endtask
  logic [19:0] pat;
  initial begin
    ctrl = '0; te = 0; scan_in = 0; cut_data1 = '0; cut_data2 = '0; mux_ctrl = '0; #1;
    cut_data2[0] = 1; cut_data2[1] = 1;   // reset released, tri-state enabled
    for (int v = 0; v < 8; v++) begin
      cut_data1 = CUT_W'(v);
      clk_both();
      for (int c = 0; c < 12; c++) begin
        set_sel(0, c); `CHECK(dout[0] == model_combo(c, 3'(v)), "combo muxout");
      end
      set_sel(1, 0); `CHECK(dout[0] == v[0], "seq cell 0");
      set_sel(2, 0); `CHECK(dout[0] == v[0], "tri buffer");
      set_sel(2, 1); `CHECK(dout[0] == !v[0], "tri inverter");
      set_sel(3, 0); `CHECK(dout[0] == 0, "cbuf idle low");
      set_sel(0, 2); clk_both(); `CHECK(dout[1] == model_combo(2, 3'(v)), "combo qout");
    end
    pat = 20'hB3A59;
    te = 1;
    for (int i = 0; i < 20; i++) begin scan_in = pat[i]; clk_both(); end
    for (int i = 0; i < 20; i++) begin `CHECK(scan_out == pat[i], "scan chain 20"); scan_in = 0; clk_both(); end
    `TB_FINISH
  end
endmodule
