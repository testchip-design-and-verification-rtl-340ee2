// tb_memblock: all three memory kinds. Functional writes/reads through the
// pins, IG blocking a write, and a BIST sequence (write then read-compare of
// every address) driven directly as bist_op_t: no bad flag on a good memory,
// bad set when the expected data is wrong, cleared by bist_clr.
`include "tb_util.svh"
module tb_memblock;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, ig = 0, sleep = 0, initn = 1, tm = 0, bist_clr = 0;
  mem_port_t p1 [3], p2 [3]; bist_op_t op;
  logic [15:0] q1 [3], q2 [3]; logic [2:0] bad;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 20000)
  for (genvar m = 0; m < 3; m++) begin : g
    memblock #(.MKIND(m)) dut (.clk1(clk), .clk2(clk), .rst_n, .ig, .sleep, .initn, .tm,
      .p1(p1[m]), .p2(p2[m]), .op, .bist_clr, .q1(q1[m]), .q2(q2[m]), .bad(bad[m]));
  end
  function automatic mem_port_t idle(); return '{csn: 1, wen: 1, addr: 0, d: 0}; endfunction
  task automatic wr(int m, logic [7:0] a, logic [15:0] d);
    @(negedge clk); p1[m] = '{csn: 0, wen: 0, addr: a, d: d}; @(negedge clk); p1[m] = idle();
  endtask
  task automatic rd(int m, logic [7:0] a);
    @(negedge clk);
    if (m == 1) p2[m] = '{csn: 0, wen: 1, addr: a, d: 0}; else p1[m] = '{csn: 0, wen: 1, addr: a, d: 0};
    @(negedge clk); p1[m] = idle(); p2[m] = idle();
  endtask
  initial begin
    op = '0;
    for (int m = 0; m < 3; m++) begin p1[m] = idle(); p2[m] = idle(); end
    @(negedge clk); rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      wr(m, 8'h11, 16'hBEEF); rd(m, 8'h11);
      `CHECK((m == 2 ? q1[m] : (m == 1 ? q2[m] : q1[m])) == 16'hBEEF, $sformatf("functional mem %0d", m));
      ig = 1; wr(m, 8'h11, 16'h0000); ig = 0; rd(m, 8'h11);
      `CHECK(q1[m] == 16'hBEEF, $sformatf("IG blocks write mem %0d", m));
    end
    // dual-port type 2, second port
    @(negedge clk); p2[2] = '{csn: 0, wen: 0, addr: 8'h22, d: 16'h1234};
    @(negedge clk); p2[2] = '{csn: 0, wen: 1, addr: 8'h22, d: 0};
    @(negedge clk); p2[2] = idle(); `CHECK(q2[2] == 16'h1234, "port 2 of type 2");
    // BIST: write pattern, read back with correct expectation
    for (int a = 0; a < 256; a++) begin @(negedge clk); op = '{en: 1, we: 1, re: 0, addr: 8'(a), data: 16'(a * 7)}; end
    for (int a = 0; a < 256; a++) begin @(negedge clk); op = '{en: 1, we: 0, re: 1, addr: 8'(a), data: 16'(a * 7)}; end
    @(negedge clk); op = '0; @(negedge clk);
    `CHECK(bad == 3'b000, "BIST pass on good memories");
    @(negedge clk); op = '{en: 1, we: 0, re: 1, addr: 8'd5, data: 16'hFFFF};
    @(negedge clk); op = '0; @(negedge clk);
    `CHECK(bad == 3'b111, "BIST flags wrong data");
    bist_clr = 1; @(negedge clk); bist_clr = 0;
    `CHECK(bad == 3'b000, "bad cleared");
    `TB_FINISH
  end
endmodule
