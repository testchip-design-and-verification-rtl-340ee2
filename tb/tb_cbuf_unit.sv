// tb_cbuf_unit: CBUF unit. The rising-edge clock gate must pass CP when E or
// TE is high and stay low otherwise; the falling-edge gate must pass CP when
// enabled and stay high otherwise. An enable change while CP is high must not
// reach the rising-edge gate until CP goes low.
`include "tb_util.svh"
module tb_cbuf_unit;
  import tc_pkg::*;
  `TB_COUNTERS
  logic cp_cut = 0, cp_ref = 0;
  logic [CUT_W-1:0] cut_data2;
  ctrl_t ctrl; test_ctrl_t tctrl;
  logic [CSEL_W-1:0] sel;
  logic muxout, qout, scan_out;
  `TB_WATCHDOG(cp_cut, 2000)
  initial forever begin #20 cp_ref = ~cp_ref; end
  cbuf_unit dut (.*);
  logic e, te;
  initial begin
    ctrl = '0; tctrl = '0; sel = 0; cut_data2 = '0; #1;
    for (int k = 0; k < 4; k++) begin
      {e, te} = 2'(k);
      cut_data2[CD2_CG_E] = e; cut_data2[CD2_CG_TE] = te; #1;
      for (int s = 0; s < 2; s++) begin
        sel = 4'(s);
        cp_cut = 0; #1 `CHECK(muxout == (s == 1 ? !(e | te) : 1'b0), "gclk low phase");
        cp_cut = 1; #1 `CHECK(muxout == (s == 0 ? (e | te) : 1'b1), "gclk high phase");
        cp_cut = 0; #1;
      end
    end
    // enable rises while CP is high: rising-edge gate stays low this phase
    sel = 0; cut_data2[CD2_CG_E] = 0; cut_data2[CD2_CG_TE] = 0; #1;
    cp_cut = 1; #1; cut_data2[CD2_CG_E] = 1; #1 `CHECK(muxout == 0, "no clipped pulse");
    cp_cut = 0; #1; cp_cut = 1; #1 `CHECK(muxout == 1, "enabled next pulse");
    // bypass and capture on the reference clock
    ctrl = '{bypass_sel: 1, bypass_data: 1}; #1 `CHECK(muxout == 1, "bypass");
    @(posedge cp_ref); #1 `CHECK(qout == 1, "qout bypass");
    `TB_FINISH
  end
endmodule
