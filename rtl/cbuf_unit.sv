// cbuf_unit: CBUF unit of an ALLCELL library, with clock-gating cells as CUTs.
//
// A clock-gating cell has E, TE and CP; either enable lets the clock through.
// E and TE come from CUT_DATA2 and CP from CP[0], as the document says. The
// gated clock is the CUT output and goes to a reference cell like in COMBO.
// Modelled cells (this design's choice):
//   0  latch-based gate for rising-edge logic: enable latched while CP is
//      low, output CP AND enable (idle low)
//   1  latch-based gate for falling-edge logic: enable latched while CP is
//      high, output CP OR NOT enable (idle high)
// The two latches are the cells' own enable latches and are intended.
module cbuf_unit
  import tc_pkg::*;
(
  input  logic               cp_cut,
  input  logic               cp_ref,
  input  logic [CUT_W-1:0]   cut_data2,
  input  ctrl_t              ctrl,
  input  test_ctrl_t         tctrl,
  input  logic [CSEL_W-1:0]  sel,
  output logic               muxout,
  output logic               qout,
  output logic               scan_out
);
  logic en, en_lo, en_hi;
  logic [N_CBUF-1:0] gclk;

  assign en = cut_data2[CD2_CG_E] | cut_data2[CD2_CG_TE];

  always_latch if (!cp_cut) en_lo = en;
  always_latch if (cp_cut)  en_hi = en;

  assign gclk[0] = cp_cut & en_lo;
  assign gclk[1] = cp_cut | ~en_hi;

  ref_chain #(.N(N_CBUF), .SEL_W(CSEL_W)) u_chain (
    .cp(cp_ref), .cut_out(gclk), .ctrl, .tctrl, .sel, .muxout, .qout, .scan_out
  );
endmodule
