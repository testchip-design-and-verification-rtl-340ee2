// fds: FDS hierarchy of an FDD unit, holding the whole small library.
//
// NCELL cells (36 by default: the QOUT bus of the document is [35:0]). Each
// cell has its own clock (gated by the FDD interface), its own TI and brings
// both Q and TQ out. D of every cell is CUT_DATA1[0]; scan enable and reset
// come from CUT_DATA2. Without RETENTION the library is a repeating mix of
// dual-edge, rising-edge-with-reset and falling-edge flops (fds_cell KIND
// 0, 1, 2); with RETENTION every cell is a retention flop (KIND 3) whose
// SLEEP pin is the sleep input. The mix of cell kinds is this design's choice.
module fds
  import tc_pkg::*;
#(
  parameter int unsigned NCELL     = 36,
  parameter bit          RETENTION = 1'b0
) (
  input  logic [NCELL-1:0] gclk,
  input  logic [CUT_W-1:0] cut_data1,
  input  logic [CUT_W-1:0] cut_data2,
  input  logic [NCELL-1:0] ti,
  input  logic             sleep,
  output logic [NCELL-1:0] q,
  output logic [NCELL-1:0] tq
);
  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    fds_cell #(.KIND(RETENTION ? 3 : i % 3)) u_cell (
      .cp(gclk[i]), .d(cut_data1[0]), .ti(ti[i]), .te(cut_data2[CD2_FTE]),
      .rstn(cut_data2[CD2_RSTN]), .sleep, .q(q[i]), .tq(tq[i])
    );
  end
endmodule
