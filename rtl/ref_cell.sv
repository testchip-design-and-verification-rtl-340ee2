// ref_cell: reference cell that observes one cell under test (CUT).
//
// A bypass multiplexer chooses between the CUT output (D0) and a bypass
// input (D1); its output is MUXOUT and feeds the D pin of a muxed-scan
// reference flop. With TE high the flop loads TI instead, so the flops of a
// unit form a scan chain (Q of one to TI of the next). This gives the three
// observation paths used by the test patterns: CUT->MUXOUT (combinational),
// D->Q through the flop, and TI->Q along the chain. Structure as drawn in
// the document; the flop samples on the rising edge of cp and has no reset
// (its content is defined by scanning or capturing).
module ref_cell (
  input  logic cp,          // reference clock (CP[1] of the interface unit)
  input  logic cut_out,     // D0 of the bypass mux
  input  logic bypass_data, // D1 of the bypass mux
  input  logic bypass_sel,
  input  logic te,
  input  logic ti,
  output logic muxout,
  output logic q
);
  assign muxout = bypass_sel ? bypass_data : cut_out;

  always_ff @(posedge cp)
    q <= te ? ti : muxout;
endmodule
