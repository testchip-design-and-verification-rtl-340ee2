// memblock: one memory test block: a memory macro with IG gating and a BIST
// wrapper.
//
// MKIND picks the macro: 0 single-port (spram), 1 dual-port type 1
// (dpram_t1), 2 dual-port type 2 (dpram_t2). The functional ports p1/p2
// come from the pins through IG gating; for type 1, p1 is the write port
// and p2 the read port (p2.d unused); for the single port only p1 is used.
// When the broadcast BIST operation is enabled (op.en) the wrapper takes the
// memory over: a write op writes op.data at op.addr, a read op reads op.addr
// through port 1 (type 1: the read port) and, one clock later when the data
// is out, compares it with op.data, the expected value. A mismatch sets the
// sticky flag bad, cleared by rst_n low or by bist_clr. clk1 clocks port 1
// (and the BIST compare), clk2 port 2 of type 2; type 1 uses clk1 for both
// ports in BIST. The wrapper structure is this design's; the document gives
// only its purpose (the bad signal of each memory).
module memblock
  import tc_pkg::*;
#(
  parameter int unsigned MKIND = 0
) (
  input  logic              clk1,
  input  logic              clk2,
  input  logic              rst_n,
  input  logic              ig,
  input  logic              sleep,
  input  logic              initn,
  input  logic              tm,
  input  mem_port_t         p1,
  input  mem_port_t         p2,
  input  bist_op_t          op,
  input  logic              bist_clr,
  output logic [MEM_DW-1:0] q1,
  output logic [MEM_DW-1:0] q2,
  output logic              bad
);
  mem_port_t g1, g2, m1, m2;
  logic [MEM_DW-1:0] exp_d;
  logic              chk;

  ig_gating u_ig1 (.ig, .in(p1), .out(g1));
  ig_gating u_ig2 (.ig, .in(p2), .out(g2));

  // BIST takes port 1 (type 1: both the write and the read port)
  always_comb begin
    m1 = g1;
    m2 = g2;
    if (op.en) begin
      m1 = '{csn: !(op.we || op.re), wen: !op.we, addr: op.addr, d: op.data};
      m2 = '{csn: 1'b1, wen: 1'b1, addr: '0, d: '0};
      if (MKIND == 1) m2 = '{csn: !op.re, wen: 1'b1, addr: op.addr, d: '0};
    end
  end

  if (MKIND == 0) begin : g_sp
    spram #(.AW(MEM_AW), .DW(MEM_DW)) u_mem (
      .clk(clk1), .initn, .sleep, .tm, .csn(m1.csn), .wen(m1.wen),
      .a(m1.addr), .d(m1.d), .q(q1)
    );
    assign q2 = '0;
  end else if (MKIND == 1) begin : g_dp1
    logic [MEM_DW-1:0] q;
    dpram_t1 #(.AW(MEM_AW), .DW(MEM_DW)) u_mem (
      .wclk(clk1), .rclk(op.en ? clk1 : clk2), .initn, .sleep, .tm,
      .wcsn(m1.csn), .rcsn(m2.csn), .wen(m1.wen), .wa(m1.addr), .ra(m2.addr),
      .d(m1.d), .q
    );
    assign q1 = q;
    assign q2 = q;
  end else begin : g_dp2
    dpram_t2 #(.AW(MEM_AW), .DW(MEM_DW)) u_mem (
      .clk1, .clk2, .initn, .sleep, .tm,
      .csn1(m1.csn), .csn2(m2.csn), .wen1(m1.wen), .wen2(m2.wen),
      .a1(m1.addr), .a2(m2.addr), .d1(m1.d), .d2(m2.d), .q1, .q2
    );
  end

  always_ff @(posedge clk1 or negedge rst_n)
    if (!rst_n) begin
      chk   <= 1'b0;
      exp_d <= '0;
      bad   <= 1'b0;
    end else begin
      chk   <= op.en && op.re;
      exp_d <= op.data;
      if (bist_clr)                bad <= 1'b0;
      else if (chk && q1 != exp_d) bad <= 1'b1;
    end
endmodule
