// tri_unit: TRI unit of an ALLCELL library, with tri-state cells as CUTs.
//
// Each tri-state CUT has an enable E (CUT_DATA2[1]) and its data input from
// CUT_DATA1[0]. Its output net carries a bus keeper, so when the cell is
// disabled the net keeps the last driven value. This model has two states
// only, so the tri-state driver and keeper together are written as a
// transparent latch: open while E is high, holding while E is low. That latch
// is intended and is the keeper. CUT 0 is a non-inverting tri-state buffer,
// CUT 1 an inverting one (this design's choice). Reference cells, chain and
// select are as in COMBO.
module tri_unit
  import tc_pkg::*;
(
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
  logic [N_TRI-1:0] bus;
  logic             e;

  assign e = cut_data2[CD2_TRI_E];

  // tri-state driver plus bus keeper
  always_latch
    if (e) begin
      bus[0] = cut_data1[0];
      bus[1] = ~cut_data1[0];
    end

  ref_chain #(.N(N_TRI), .SEL_W(CSEL_W)) u_chain (
    .cp(cp_ref), .cut_out(bus), .ctrl, .tctrl, .sel, .muxout, .qout, .scan_out
  );
endmodule
