// fdd_mux: output multiplexer of an FDD unit.
//
// MUX_CTRL[13:8] (the same bits as the block select of the FDD interface)
// picks one bit of QOUT[35:0]; the result MUXOUT goes to the reference cell
// of the unit. A select beyond NCELL-1 gives 0. Combinational.
module fdd_mux
  import tc_pkg::*;
#(
  parameter int unsigned NCELL = 36
) (
  input  logic [MUXCTL_W-1:0] mux_ctrl,
  input  logic [NCELL-1:0]    qout,
  output logic                muxout
);
  logic [FSEL_W-1:0] sel;
  assign sel = mux_ctrl[FSEL_LSB +: FSEL_W];

  always_comb begin
    muxout = 1'b0;
    for (int i = 0; i < NCELL; i++)
      if (sel == FSEL_W'(i)) muxout = qout[i];
  end
endmodule
