// fdd_interface: interface between the FDD unit pins and the FDS cells.
//
// - TI: cell i gets its own scan input, bit i of QOUT_P (the MUXIN_QOUT bus
//   of the previous FDD unit), so that cell i of all units forms chain i.
// - Block select: MUX_CTRL[13:8] names one cell. In normal mode (TM low)
//   only that cell receives clock pulses; in test mode (TM high) CP goes to
//   every cell. Each gated clock comes from a latch-based clock gate (enable
//   latched while CP is low), whose latch is intended.
// - Output: per cell, Q or TQ is chosen by CUT_DATA2[5] (1 = TQ) and driven
//   onto MUXIN_QOUT.
// Functions as listed in the document; the Q/TQ select pin and the clock-gate
// style are this design's choice.
module fdd_interface
  import tc_pkg::*;
#(
  parameter int unsigned NCELL = 36
) (
  input  logic                cp,
  input  logic                tm,
  input  logic [MUXCTL_W-1:0] mux_ctrl,
  input  logic [CUT_W-1:0]    cut_data2,
  input  logic [NCELL-1:0]    qout_p,
  input  logic [NCELL-1:0]    cell_q,
  input  logic [NCELL-1:0]    cell_tq,
  output logic [NCELL-1:0]    cell_ti,
  output logic [NCELL-1:0]    gclk,
  output logic [NCELL-1:0]    muxin_qout
);
  logic [FSEL_W-1:0] bsel;
  logic [NCELL-1:0]  en, en_l;

  assign bsel    = mux_ctrl[FSEL_LSB +: FSEL_W];
  assign cell_ti = qout_p;

  for (genvar i = 0; i < NCELL; i++) begin : g_cg
    assign en[i] = tm | (bsel == FSEL_W'(i));
    always_latch if (!cp) en_l[i] = en[i];
    assign gclk[i] = cp & en_l[i];
  end

  assign muxin_qout = cut_data2[CD2_TQSEL] ? cell_tq : cell_q;
endmodule
