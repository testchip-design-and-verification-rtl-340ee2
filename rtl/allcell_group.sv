// allcell_group: one ALLCELL group (G1, G2, ...).
//
// A group is its controller plus the R0 and R90 halves, which hold the same
// NINST library instances in the two placement orientations. The halves get
// their buses from the controller (pass-through or OLT stimulus). dout is
// {R90 outputs, R0 outputs}, 4*NINST bits; the controller compares the two
// halves during OLT and reports bbad and bend. The scan chain runs through
// R0 and then R90.
module allcell_group
  import tc_pkg::*;
#(
  parameter int unsigned NINST       = 4,
  parameter int unsigned OLT_DATA_W  = CUT_W
) (
  input  logic [1:0]          cp,
  input  logic                rst_n,
  input  logic                olt_en,
  input  logic [CUT_W-1:0]    cut_data1,
  input  logic [CUT_W-1:0]    cut_data2,
  input  logic [MUXCTL_W-1:0] mux_ctrl,
  input  ctrl_t               ctrl,
  input  test_ctrl_t          tctrl,
  output logic [4*NINST-1:0]  dout,
  output logic                scan_out,
  output logic                bbad,
  output logic                bend
);
  logic [CUT_W-1:0]    cd1, cd2;
  logic [MUXCTL_W-1:0] mc;
  ctrl_t               ct;
  test_ctrl_t          tc, tc90;
  logic [2*NINST-1:0]  d0, d90;
  logic                so0;

  olt_controller #(.NINST(NINST), .DATA_W(OLT_DATA_W)) u_ctrl (
    .clk(cp[1]), .rst_n, .olt_en,
    .cut_data1_i(cut_data1), .cut_data2_i(cut_data2), .mux_ctrl_i(mux_ctrl),
    .ctrl_i(ctrl), .tctrl_i(tctrl), .dout1(d0), .dout2(d90),
    .cut_data1(cd1), .cut_data2(cd2), .mux_ctrl(mc), .ctrl(ct), .tctrl(tc),
    .bbad, .bend
  );

  group_half #(.NINST(NINST)) u_r0 (
    .cp, .cut_data1(cd1), .cut_data2(cd2), .mux_ctrl(mc), .ctrl(ct),
    .tctrl(tc), .dout(d0), .scan_out(so0)
  );

  assign tc90 = '{te: tc.te, ti: so0};

  group_half #(.NINST(NINST)) u_r90 (
    .cp, .cut_data1(cd1), .cut_data2(cd2), .mux_ctrl(mc), .ctrl(ct),
    .tctrl(tc90), .dout(d90), .scan_out
  );

  assign dout = {d90, d0};
endmodule
