// allcell_top: ALLCELL standard-cell test block.
//
// The input buses (CP, CTRL, CUT_DATA1/2, MUX_CTRL, TEST_CTRL, OLT_CTRL) are
// buffered by the input block and fanned out to NGROUP groups; each group has
// an OLT controller and R0/R90 halves of NINST library instances. The output
// block selects one instance's {QOUT, MUXOUT} onto dout. The input block is
// plain buffering and is wires here. The scan chains of the groups are joined
// in group order from tctrl.ti to scan_out. bbad/bend are one bit per group.
// Defaults: two groups (G1, G2) of 2 libraries x 2 instances per half, as
// drawn in the document.
module allcell_top
  import tc_pkg::*;
#(
  parameter int unsigned NGROUP     = 2,
  parameter int unsigned NINST      = 4,
  parameter int unsigned OLT_DATA_W = CUT_W,
  parameter int unsigned OSEL_W     = 8
) (
  input  logic [1:0]          cp,
  input  logic                rst_n,
  input  logic                olt_en,     // OLT_CTRL
  input  logic [CUT_W-1:0]    cut_data1,
  input  logic [CUT_W-1:0]    cut_data2,
  input  logic [MUXCTL_W-1:0] mux_ctrl,
  input  ctrl_t               ctrl,
  input  test_ctrl_t          tctrl,
  input  logic [OSEL_W-1:0]   o_sel,
  output logic [1:0]          dout,
  output logic                scan_out,
  output logic [NGROUP-1:0]   bbad,
  output logic [NGROUP-1:0]   bend
);
  logic [NGROUP*4*NINST-1:0] gdout;
  logic [NGROUP:0]           chain;

  assign chain[0] = tctrl.ti;

  for (genvar g = 0; g < NGROUP; g++) begin : g_grp
    allcell_group #(.NINST(NINST), .OLT_DATA_W(OLT_DATA_W)) u_grp (
      .cp, .rst_n, .olt_en, .cut_data1, .cut_data2, .mux_ctrl, .ctrl,
      .tctrl('{te: tctrl.te, ti: chain[g]}),
      .dout(gdout[g*4*NINST +: 4*NINST]), .scan_out(chain[g+1]),
      .bbad(bbad[g]), .bend(bend[g])
    );
  end

  assign scan_out = chain[NGROUP];

  o_block #(.NGROUP(NGROUP), .NINST(NINST), .SEL_W(OSEL_W)) u_oblk (
    .gdout, .o_sel, .dout
  );
endmodule
