// o_block: output block of ALLCELL.
//
// Each group returns 4*NINST output bits (two per library instance and
// orientation). o_sel picks one instance: o_sel = group index * 2*NINST +
// instance index within the group (R0 instances first, then R90), and dout is
// that instance's {QOUT, MUXOUT}. Selects beyond the last instance give 0.
// The document only says the output block muxes the group outputs and that
// its shape depends on the group sizes; the select encoding is this design's.
module o_block #(
  parameter int unsigned NGROUP = 2,
  parameter int unsigned NINST  = 4,
  parameter int unsigned SEL_W  = 8
) (
  input  logic [NGROUP*4*NINST-1:0] gdout,
  input  logic [SEL_W-1:0]          o_sel,
  output logic [1:0]                dout
);
  always_comb begin
    dout = 2'b00;
    for (int i = 0; i < NGROUP * 2 * NINST; i++)
      if (o_sel == SEL_W'(i)) dout = gdout[2*i +: 2];
  end

  initial assert (NGROUP * 2 * NINST <= 2**SEL_W)
    else $error("o_block: SEL_W too small");
endmodule
