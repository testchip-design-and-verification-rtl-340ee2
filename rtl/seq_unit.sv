// seq_unit: SEQ unit of an ALLCELL library, with flip-flops as CUTs.
//
// The CUT flops are clocked by cp_cut (CP[0]) and the reference flops by
// cp_ref (CP[1]), so the two clocks can be driven independently from the
// pins. The CUT reset comes from CUT_DATA2 and the scan pins of the scan CUT
// from TEST_CTRL, as the document says. The four modelled CUTs are:
//   0  D flop, rising edge
//   1  D flop, rising edge, asynchronous active-low reset
//   2  D flop, falling edge
//   3  muxed-scan D flop (TE selects TI), rising edge, active-low reset
// D of every CUT is CUT_DATA1[0]. The cell list is this design's choice.
// The rest of the unit (reference cells, chain, select) is as in COMBO.
module seq_unit
  import tc_pkg::*;
(
  input  logic               cp_cut,
  input  logic               cp_ref,
  input  logic [CUT_W-1:0]   cut_data1,
  input  logic [CUT_W-1:0]   cut_data2,
  input  ctrl_t              ctrl,
  input  test_ctrl_t         tctrl,
  input  logic [CSEL_W-1:0]  sel,
  output logic               muxout,
  output logic               qout,
  output logic               scan_out
);
  logic [N_SEQ-1:0] q;
  logic             q0, q1, q2, q3;
  logic             d, rstn;

  assign d    = cut_data1[0];
  assign rstn = cut_data2[CD2_RSTN];

  always_ff @(posedge cp_cut) q0 <= d;

  always_ff @(posedge cp_cut or negedge rstn)
    if (!rstn) q1 <= 1'b0;
    else       q1 <= d;

  always_ff @(negedge cp_cut) q2 <= d;

  always_ff @(posedge cp_cut or negedge rstn)
    if (!rstn) q3 <= 1'b0;
    else       q3 <= tctrl.te ? tctrl.ti : d;

  assign q = {q3, q2, q1, q0};

  ref_chain #(.N(N_SEQ), .SEL_W(CSEL_W)) u_chain (
    .cp(cp_ref), .cut_out(q), .ctrl, .tctrl, .sel, .muxout, .qout, .scan_out
  );
endmodule
