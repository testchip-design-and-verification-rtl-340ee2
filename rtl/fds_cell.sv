// fds_cell: behavioural model of one special flip-flop of the FDD library
// (kind: behavioural_model of a process-specific standard cell).
//
// Every cell is a muxed-scan flop (TE selects TI over D) with a functional
// output Q and a separate scan output TQ, which carries the same value.
// KIND selects the flavour (this design's choice of a representative set):
//   0  dual-edge triggered: captures on both clock edges. Written as two
//      flops, one per edge, whose XOR is the output: each edge stores
//      D XOR (the other flop), so Q changes only after an edge, like the
//      real cell, and chains of these cells shift two stages per clock.
//   1  rising edge, asynchronous active-low reset
//   2  falling edge
//   3  retention flop, rising edge: while SLEEP is high the clock is ignored,
//      the stored bit is kept and Q/TQ read 0 (periphery powered down);
//      after SLEEP falls the kept bit shows again.
module fds_cell #(
  parameter int unsigned KIND = 0
) (
  input  logic cp,
  input  logic d,
  input  logic ti,
  input  logic te,
  input  logic rstn,
  input  logic sleep,
  output logic q,
  output logic tq
);
  logic din;
  assign din = te ? ti : d;

  if (KIND == 0) begin : g_det
    logic qp, qn;
    always_ff @(posedge cp) qp <= din ^ qn;
    always_ff @(negedge cp) qn <= din ^ qp;
    assign q = qp ^ qn;
  end else if (KIND == 1) begin : g_pos
    always_ff @(posedge cp or negedge rstn)
      if (!rstn) q <= 1'b0;
      else       q <= din;
  end else if (KIND == 2) begin : g_neg
    always_ff @(negedge cp) q <= din;
  end else begin : g_ret
    logic qr;
    always_ff @(posedge cp)
      if (!sleep) qr <= din;
    assign q = sleep ? 1'b0 : qr;
  end

  assign tq = q;
endmodule
