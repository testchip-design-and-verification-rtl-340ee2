// tb_tri_unit: TRI unit. With E high the tri-state CUTs drive the data
// (buffer and inverter); with E low the bus keepers hold the last value
// whatever the data does. Checked through MUXOUT and QOUT, plus scan.
`include "tb_util.svh"
module tb_tri_unit;
  import tc_pkg::*;
  `TB_COUNTERS
  logic cp_ref = 0;
  logic [CUT_W-1:0] cut_data1, cut_data2;
  ctrl_t ctrl; test_ctrl_t tctrl;
  logic [CSEL_W-1:0] sel;
  logic muxout, qout, scan_out;
  logic held;
  always #5 cp_ref = ~cp_ref;
  `TB_WATCHDOG(cp_ref, 2000)
  tri_unit dut (.*);
  initial begin
    ctrl = '0; tctrl = '0; sel = 0; cut_data1 = 0; cut_data2 = '0;
    for (int i = 0; i < 40; i++) begin
      @(negedge cp_ref);
      cut_data2[CD2_TRI_E] = 1; cut_data1[0] = 1'($urandom); held = cut_data1[0];
      sel = 0; #1 `CHECK(muxout == held, "buffer drives");
      sel = 1; #1 `CHECK(muxout == !held, "inverter drives");
      cut_data2[CD2_TRI_E] = 0; #1 cut_data1[0] = !held;
      sel = 0; #1 `CHECK(muxout == held, "keeper holds 0");
      sel = 1; #1 `CHECK(muxout == !held, "keeper holds 1");
      @(posedge cp_ref); #1 `CHECK(qout == !held, "qout");
    end
    @(negedge cp_ref); tctrl = '{te: 1, ti: 1};
    @(negedge cp_ref); tctrl.ti = 0;
    @(negedge cp_ref); `CHECK(scan_out == 1, "scan 1");
    @(negedge cp_ref); `CHECK(scan_out == 0, "scan 0");
    `TB_FINISH
  end
endmodule
