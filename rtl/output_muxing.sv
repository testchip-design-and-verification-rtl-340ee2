// output_muxing: carries the output bus of the selected block to the pads.
//
// Each block presents W output bits. The lowest-numbered block whose
// BLOCKSEL bit is set drives the pads; with none selected the pads read 0.
// Combinational. Purpose from the document; the priority rule for several
// set bits is this design's choice.
module output_muxing #(
  parameter int unsigned NBLK = tc_pkg::NBLK,
  parameter int unsigned W    = 40
) (
  input  logic [W-1:0]    blk_out [NBLK],
  input  logic [NBLK-1:0] blocksel,
  output logic [W-1:0]    pads
);
  always_comb begin
    pads = '0;
    for (int i = NBLK - 1; i >= 0; i--)
      if (blocksel[i]) pads = blk_out[i];
  end
endmodule
