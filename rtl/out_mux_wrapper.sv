// out_mux_wrapper: output multiplexer of one library instance.
//
// Each of the four units (COMBO, SEQ, TRI, CBUF) delivers one MUXOUT and one
// QOUT bit: four bits of each. MUX_CTRL[11:10] selects the cell type, so two
// multiplexers reduce the eight bits to the two output bits
// dout = {qout, muxout}. Purely combinational. Width and select bits follow
// the document; the index order 0 COMBO, 1 SEQ, 2 TRI, 3 CBUF is this
// design's choice.
module out_mux_wrapper
  import tc_pkg::*;
(
  input  logic [3:0]  muxout_in,  // indexed by cell_type_e
  input  logic [3:0]  qout_in,
  input  cell_type_e  type_sel,   // MUX_CTRL[11:10]
  output logic [1:0]  dout        // {qout, muxout}
);
  assign dout = {qout_in[type_sel], muxout_in[type_sel]};
endmodule
