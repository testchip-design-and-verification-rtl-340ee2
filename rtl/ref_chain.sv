// ref_chain: one reference cell per CUT of a unit, chained for scan, plus the
// per-unit output selection.
//
// Each CUT output goes to its own ref_cell. The reference flops are linked
// Q -> TI so that TI enters cell 0 and scan_out leaves cell N-1. The cell
// select picks which cell's MUXOUT and Q are passed to the output mux wrapper;
// an index beyond N-1 gives 0. The chaining follows the document; the select
// multiplexer and its encoding are this design's choice.
module ref_chain #(
  parameter int unsigned N = 4,
  parameter int unsigned SEL_W = 4
) (
  input  logic             cp,
  input  logic [N-1:0]     cut_out,
  input  tc_pkg::ctrl_t    ctrl,
  input  tc_pkg::test_ctrl_t tctrl,
  input  logic [SEL_W-1:0] sel,
  output logic             muxout,
  output logic             qout,
  output logic             scan_out
);
  logic [N-1:0] mo, q;

  for (genvar i = 0; i < N; i++) begin : g_ref
    ref_cell u_ref (
      .cp, .cut_out(cut_out[i]), .bypass_data(ctrl.bypass_data),
      .bypass_sel(ctrl.bypass_sel), .te(tctrl.te),
      .ti(i == 0 ? tctrl.ti : q[(i == 0) ? 0 : i-1]),
      .muxout(mo[i]), .q(q[i])
    );
  end

  always_comb begin
    muxout = 1'b0;
    qout   = 1'b0;
    for (int i = 0; i < N; i++)
      if (sel == SEL_W'(i)) begin
        muxout = mo[i];
        qout   = q[i];
      end
  end

  assign scan_out = q[N-1];
endmodule
