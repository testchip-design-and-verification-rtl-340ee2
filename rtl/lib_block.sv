// lib_block: one instance of a standard-cell library in an ALLCELL group.
//
// Holds the four basic units COMBO, SEQ, TRI and CBUF and the output mux
// wrapper. MUX_CTRL[3:0] picks the cell inside every unit and
// MUX_CTRL[11:10] picks the unit, giving dout = {QOUT, MUXOUT} (DOUTn in the
// document). The reference flops of the four units are joined into one
// scan chain in the order COMBO, SEQ, TRI, CBUF: scan_in enters the first
// COMBO cell and scan_out leaves the last CBUF cell. cp[0] clocks the CUT
// flops and clock-gating cells, cp[1] all reference flops.
module lib_block
  import tc_pkg::*;
(
  input  logic [1:0]          cp,
  input  logic [CUT_W-1:0]    cut_data1,
  input  logic [CUT_W-1:0]    cut_data2,
  input  logic [MUXCTL_W-1:0] mux_ctrl,
  input  ctrl_t               ctrl,
  input  logic                te,
  input  logic                scan_in,
  output logic [1:0]          dout,
  output logic                scan_out
);
  logic [3:0] mo, qo, so;
  logic [CSEL_W-1:0] sel;
  test_ctrl_t tc_combo, tc_seq, tc_tri, tc_cbuf;

  assign sel      = mux_ctrl[CSEL_LSB +: CSEL_W];
  assign tc_combo = '{te: te, ti: scan_in};
  assign tc_seq   = '{te: te, ti: so[TYPE_COMBO]};
  assign tc_tri   = '{te: te, ti: so[TYPE_SEQ]};
  assign tc_cbuf  = '{te: te, ti: so[TYPE_TRI]};

  combo_unit u_combo (
    .cp_ref(cp[1]), .cut_data1, .ctrl, .tctrl(tc_combo), .sel,
    .muxout(mo[TYPE_COMBO]), .qout(qo[TYPE_COMBO]), .scan_out(so[TYPE_COMBO])
  );
  seq_unit u_seq (
    .cp_cut(cp[0]), .cp_ref(cp[1]), .cut_data1, .cut_data2, .ctrl,
    .tctrl(tc_seq), .sel,
    .muxout(mo[TYPE_SEQ]), .qout(qo[TYPE_SEQ]), .scan_out(so[TYPE_SEQ])
  );
  tri_unit u_tri (
    .cp_ref(cp[1]), .cut_data1, .cut_data2, .ctrl, .tctrl(tc_tri), .sel,
    .muxout(mo[TYPE_TRI]), .qout(qo[TYPE_TRI]), .scan_out(so[TYPE_TRI])
  );
  cbuf_unit u_cbuf (
    .cp_cut(cp[0]), .cp_ref(cp[1]), .cut_data2, .ctrl, .tctrl(tc_cbuf), .sel,
    .muxout(mo[TYPE_CBUF]), .qout(qo[TYPE_CBUF]), .scan_out(so[TYPE_CBUF])
  );

  out_mux_wrapper u_omux (
    .muxout_in(mo), .qout_in(qo),
    .type_sel(cell_type_e'(mux_ctrl[TSEL_LSB +: TSEL_W])), .dout
  );

  assign scan_out = so[TYPE_CBUF];
endmodule
