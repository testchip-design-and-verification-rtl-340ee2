// fdd_block: FDD (or, with RETENTION set, retention) standard-cell block.
//
// The FDD unit is replicated NUNIT times (the document instantiates its small
// library 1024 times). Unit k takes as scan inputs the MUXIN_QOUT bus of unit
// k-1 (unit 0 takes ti_in), so cell i of every unit lies on scan chain i and
// qout carries the ends of the 36 chains. Every unit has its own reference
// cell on MUXOUT, with bypass mux and a reference flop clocked by cp; the
// reference flops are chained from tctrl.ti to ref_scan_out. The retention
// block has the same architecture and connectivity; only its cells are
// retention flops whose SLEEP input is the (always-on routed) sleep pin.
module fdd_block
  import tc_pkg::*;
#(
  parameter int unsigned NUNIT     = 1024,
  parameter int unsigned NCELL     = 36,
  parameter bit          RETENTION = 1'b0
) (
  input  logic                cp,
  input  logic                tm,
  input  logic                sleep,
  input  logic [CUT_W-1:0]    cut_data1,
  input  logic [CUT_W-1:0]    cut_data2,
  input  logic [MUXCTL_W-1:0] mux_ctrl,
  input  ctrl_t               ctrl,
  input  test_ctrl_t          tctrl,
  input  logic [NCELL-1:0]    ti_in,
  output logic [NCELL-1:0]    qout,
  output logic                muxout0,       // MUXOUT of the reference cell of unit 0
  output logic                ref_scan_out
);
  logic [NCELL-1:0] chain [NUNIT+1];
  logic [NUNIT:0]   rchain;
  logic [NUNIT-1:0] mo, rmo;

  assign chain[0]  = ti_in;
  assign rchain[0] = tctrl.ti;

  for (genvar k = 0; k < NUNIT; k++) begin : g_unit
    fdd_unit #(.NCELL(NCELL), .RETENTION(RETENTION)) u_fdd (
      .cp, .tm, .sleep, .cut_data1, .cut_data2, .mux_ctrl,
      .qout_p(chain[k]), .muxin_qout(chain[k+1]), .muxout(mo[k])
    );
    ref_cell u_ref (
      .cp, .cut_out(mo[k]), .bypass_data(ctrl.bypass_data),
      .bypass_sel(ctrl.bypass_sel), .te(tctrl.te), .ti(rchain[k]),
      .muxout(rmo[k]), .q(rchain[k+1])
    );
  end

  assign qout         = chain[NUNIT];
  assign muxout0      = rmo[0];
  assign ref_scan_out = rchain[NUNIT];
endmodule
