// group_half: one orientation (R0 or R90) of an ALLCELL group.
//
// NINST library instances side by side; all share the buses from the group
// controller, and each returns its own two output bits, so
// dout[2k+1:2k] belongs to instance k. Their scan chains are joined in
// instance order. The document limits a half to 16 instances and draws two
// libraries with two instances each, the default here.
module group_half
  import tc_pkg::*;
#(
  parameter int unsigned NINST = 4
) (
  input  logic [1:0]          cp,
  input  logic [CUT_W-1:0]    cut_data1,
  input  logic [CUT_W-1:0]    cut_data2,
  input  logic [MUXCTL_W-1:0] mux_ctrl,
  input  ctrl_t               ctrl,
  input  test_ctrl_t          tctrl,
  output logic [2*NINST-1:0]  dout,
  output logic                scan_out
);
  logic [NINST:0] chain;
  assign chain[0] = tctrl.ti;

  for (genvar k = 0; k < NINST; k++) begin : g_lib
    lib_block u_lib (
      .cp, .cut_data1, .cut_data2, .mux_ctrl, .ctrl, .te(tctrl.te),
      .scan_in(chain[k]), .dout(dout[2*k +: 2]), .scan_out(chain[k+1])
    );
  end

  assign scan_out = chain[NINST];

  initial assert (NINST >= 1 && NINST <= 16)
    else $error("group_half: NINST must be 1..16");
endmodule
