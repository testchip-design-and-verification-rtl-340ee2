// tb_mbist_controller: runs March C- against a behavioural memory in the
// testbench (256 words) and checks the operation sequence element by element
// (order, address direction, data polarity), the run length of 10*256
// operations plus the drain, done, and the reporting of injected bad flags.
`include "tb_util.svh"
module tb_mbist_controller;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, start = 0; logic [2:0] bad_in = 0;
  logic en, we, re, inv, clear, busy, done, fail; logic [7:0] addr; logic [2:0] bad;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 20000)
  mbist_controller #(.NMEM(3), .PIPE_STAGES(1)) dut (.*);
  // expected March C- sequence
  typedef struct { bit w; bit r; bit v; int a; } op_s;
  op_s exp_q [$];
  int nops = 0, bad_ops = 0, t_start, t_done;
  bit memv [256];
  initial begin
    for (int a = 0; a < 256; a++) exp_q.push_back('{1, 0, 0, a});
    for (int a = 0; a < 256; a++) begin exp_q.push_back('{0, 1, 0, a}); exp_q.push_back('{1, 0, 1, a}); end
    for (int a = 0; a < 256; a++) begin exp_q.push_back('{0, 1, 1, a}); exp_q.push_back('{1, 0, 0, a}); end
    for (int a = 255; a >= 0; a--) begin exp_q.push_back('{0, 1, 0, a}); exp_q.push_back('{1, 0, 1, a}); end
    for (int a = 255; a >= 0; a--) begin exp_q.push_back('{0, 1, 1, a}); exp_q.push_back('{1, 0, 0, a}); end
    for (int a = 0; a < 256; a++) exp_q.push_back('{0, 1, 0, a});
  end
  always @(posedge clk) if (en) begin
    op_s e;
    if (nops < exp_q.size()) begin
      e = exp_q[nops];
      if (!(we == e.w && re == e.r && inv == e.v && addr == 8'(e.a))) bad_ops++;
      // March C-: every read sees what the previous element wrote
      if (re && memv[addr] != inv) bad_ops++;
      if (we) memv[addr] = inv;
    end
    nops++;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; t_start = $time;
    #1 `CHECK(clear == 1, "clear pulse at start");
    @(negedge clk); start = 0;
    wait (done); t_done = $time;
    `CHECK(nops == 2560, $sformatf("2560 operations, got %0d", nops));
    `CHECK(bad_ops == 0, $sformatf("operation sequence (%0d wrong)", bad_ops));
    `CHECK((t_done - t_start) / 10 == 2560 + 3, $sformatf("run length %0d", (t_done - t_start) / 10));
    `CHECK(fail == 0 && bad == 0, "no fail");
    // second run with a failing memory
    bad_in = 3'b010;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    #1 `CHECK(busy && !done, "busy during run");
    wait (done); #1;
    `CHECK(fail == 1 && bad == 3'b010, "fail reported");
    `TB_FINISH
  end
endmodule
