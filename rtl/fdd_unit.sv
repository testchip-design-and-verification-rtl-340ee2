// fdd_unit: one FDD unit (pins as in the FDD block pin diagram).
//
// FDD interface, FDS library and FDD multiplexer. Inputs CUT_DATA1[9:0],
// CUT_DATA2[9:0], QOUT_P[35:0] (scan inputs from the previous unit),
// MUX_CTRL, CP, TM; outputs MUXIN_QOUT[35:0] (Q or TQ of every cell, to the
// next unit) and MUXOUT (one selected cell, to the reference cell). The
// retention variant has the same structure with retention flops and a SLEEP
// input.
module fdd_unit
  import tc_pkg::*;
#(
  parameter int unsigned NCELL     = 36,
  parameter bit          RETENTION = 1'b0
) (
  input  logic                cp,
  input  logic                tm,
  input  logic                sleep,
  input  logic [CUT_W-1:0]    cut_data1,
  input  logic [CUT_W-1:0]    cut_data2,
  input  logic [MUXCTL_W-1:0] mux_ctrl,
  input  logic [NCELL-1:0]    qout_p,
  output logic [NCELL-1:0]    muxin_qout,
  output logic                muxout
);
  logic [NCELL-1:0] ti, gclk, q, tq;

  fdd_interface #(.NCELL(NCELL)) u_if (
    .cp, .tm, .mux_ctrl, .cut_data2, .qout_p, .cell_q(q), .cell_tq(tq),
    .cell_ti(ti), .gclk, .muxin_qout
  );

  fds #(.NCELL(NCELL), .RETENTION(RETENTION)) u_fds (
    .gclk, .cut_data1, .cut_data2, .ti, .sleep, .q, .tq
  );

  fdd_mux #(.NCELL(NCELL)) u_mux (.mux_ctrl, .qout(muxin_qout), .muxout);
endmodule
