// tb_seq_unit: SEQ unit with separate CUT and reference clocks. Checks each
// flop CUT (rising, reset, falling, scan) through MUXOUT and QOUT, the
// asynchronous reset from CUT_DATA2 and the scan chain of 4 reference flops.
`include "tb_util.svh"
module tb_seq_unit;
  import tc_pkg::*;
  `TB_COUNTERS
  logic cp_cut = 0, cp_ref = 0;
  logic [CUT_W-1:0] cut_data1, cut_data2;
  ctrl_t ctrl; test_ctrl_t tctrl;
  logic [CSEL_W-1:0] sel;
  logic muxout, qout, scan_out;
  `TB_WATCHDOG(cp_cut, 2000)
  seq_unit dut (.*);
  task automatic pulse_cut(); #2 cp_cut = 1; #2 cp_cut = 0; #1; endtask
  task automatic pulse_ref(); #2 cp_ref = 1; #2 cp_ref = 0; #1; endtask
  logic [3:0] pat;
  initial begin
    ctrl = '0; tctrl = '0; sel = 0; cut_data1 = 0; cut_data2 = '0; #1;
    cut_data2[CD2_RSTN] = 1;
    // capture 1 on the rising edge: cells 0,1,3 take it, cell 2 (falling) not yet
    cut_data1[0] = 0; pulse_cut();           // falling-edge flop now 0
    cut_data1[0] = 1; #2 cp_cut = 1; #1;
    for (int c = 0; c < 4; c++) begin
      sel = 4'(c); #1 `CHECK(muxout == (c != 2), $sformatf("rising edge cell %0d", c));
    end
    cp_cut = 0; #1;
    sel = 4'd2; #1 `CHECK(muxout == 1, "falling edge cell");
    // reference flop captures the selected CUT
    sel = 4'd1; pulse_ref(); `CHECK(qout == 1, "qout cell 1");
    // reset from CUT_DATA2 clears cells 1 and 3 only
    cut_data2[CD2_RSTN] = 0; #1;
    sel = 4'd1; #1 `CHECK(muxout == 0, "reset cell 1");
    sel = 4'd3; #1 `CHECK(muxout == 0, "reset cell 3");
    sel = 4'd0; #1 `CHECK(muxout == 1, "no reset cell 0");
    cut_data2[CD2_RSTN] = 1;
    // scan CUT takes TI with TE (TE also shifts the reference chain)
    tctrl = '{te: 1, ti: 1}; cut_data1[0] = 0; pulse_cut();
    sel = 4'd3; #1 `CHECK(muxout == 1, "scan cut TI");
    sel = 4'd0; #1 `CHECK(muxout == 0, "cell 0 D");
    // reference scan chain
    pat = 4'b1011;
    for (int i = 0; i < 4; i++) begin tctrl.ti = pat[i]; pulse_ref(); end
    for (int i = 0; i < 4; i++) begin `CHECK(scan_out == pat[i], "scan"); tctrl.ti = 0; pulse_ref(); end
    `TB_FINISH
  end
endmodule
