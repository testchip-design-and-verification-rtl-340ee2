// clk_assembly: maps the chip clocks to the blocks.
//
// For each of the NBLK blocks, clk_sel picks one of the two input clocks and
// the block's BLOCKSEL bit gates it: an unselected block gets no clock. The
// gate is a latch-based clock gate (enable latched while the selected clock
// is low, output clock AND enable), so enabling never clips a pulse; the
// latch is intended. clk_sel should only change while the block is
// deselected. The document says only that the block maps which clock goes to
// which block; the two sources and the gating are this design's choice.
module clk_assembly #(
  parameter int unsigned NBLK = tc_pkg::NBLK
) (
  input  logic [1:0]      clk_in,
  input  logic [NBLK-1:0] clk_sel,
  input  logic [NBLK-1:0] blocksel,
  output logic [NBLK-1:0] blk_clk
);
  for (genvar i = 0; i < NBLK; i++) begin : g_clk
    logic c, en_l;
    assign c = clk_sel[i] ? clk_in[1] : clk_in[0];
    always_latch if (!c) en_l = blocksel[i];
    assign blk_clk[i] = c & en_l;
  end
endmodule
