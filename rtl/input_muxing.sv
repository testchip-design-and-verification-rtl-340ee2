// input_muxing: routes the shared input pins to the selected block.
//
// The chip has one bus of W general input pins. Block i sees the pins when
// its BLOCKSEL bit is set and all zeros otherwise, so unselected blocks stay
// quiet. Combinational. Purpose from the document; the zero-forcing is this
// design's choice.
module input_muxing #(
  parameter int unsigned NBLK = tc_pkg::NBLK,
  parameter int unsigned W    = 80
) (
  input  logic [W-1:0]    pins,
  input  logic [NBLK-1:0] blocksel,
  output logic [W-1:0]    blk_in [NBLK]
);
  always_comb
    for (int i = 0; i < NBLK; i++)
      blk_in[i] = blocksel[i] ? pins : '0;
endmodule
