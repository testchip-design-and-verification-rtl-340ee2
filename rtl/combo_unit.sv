// combo_unit: COMBO unit of an ALLCELL library.
//
// N_CUT combinational cells under test share their inputs (CUT_DATA1[2:0]).
// Cell i implements function CELLS[i] of tc_pkg::comb_cell_e; in silicon it
// would be the library cell itself, here its logic function. Every CUT output
// drives the D0 input of its own reference cell; the reference flops form a
// scan chain (see ref_chain). MUXOUT is combinational from the inputs, QOUT
// is the selected reference flop, updated on the rising edge of cp_ref.
// Topology from the document; the cell list is this design's choice.
module combo_unit
  import tc_pkg::*;
#(
  parameter int unsigned N_CUT = tc_pkg::N_COMBO
) (
  input  logic               cp_ref,
  input  logic [CUT_W-1:0]   cut_data1,
  input  ctrl_t              ctrl,
  input  test_ctrl_t         tctrl,
  input  logic [CSEL_W-1:0]  sel,
  output logic               muxout,
  output logic               qout,
  output logic               scan_out
);
  logic [N_CUT-1:0] cut_out;

  for (genvar i = 0; i < N_CUT; i++) begin : g_cut
    assign cut_out[i] = comb_eval(comb_cell_e'(i % N_COMBO), cut_data1[2:0]);
  end

  ref_chain #(.N(N_CUT), .SEL_W(CSEL_W)) u_chain (
    .cp(cp_ref), .cut_out, .ctrl, .tctrl, .sel, .muxout, .qout, .scan_out
  );
endmodule
