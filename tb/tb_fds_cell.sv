// tb_fds_cell: all four cell kinds side by side. Dual-edge captures on both
// edges, rising-edge with reset, falling-edge, and the retention flop
// (clock ignored and Q reading 0 during SLEEP, value back after SLEEP).
`include "tb_util.svh"
module tb_fds_cell;
  `TB_COUNTERS
  logic cp = 0, d = 0, ti = 0, te = 0, rstn = 1, sleep = 0;
  logic [3:0] q, tq;
  `TB_WATCHDOG(cp, 1000)
  for (genvar k = 0; k < 4; k++) begin : g
    fds_cell #(.KIND(k)) u (.cp, .d, .ti, .te, .rstn, .sleep, .q(q[k]), .tq(tq[k]));
  end
  initial begin
    #1;
    d = 1; #1 cp = 1; #1;
    `CHECK(q[0] == 1 && q[1] == 1 && q[3] == 1, "rising edge capture");
    d = 0; #1 cp = 0; #1;
    `CHECK(q[0] == 0 && q[2] == 0 && q[1] == 1, "falling edge: DET and NEG capture, POS holds");
    d = 1; #1 cp = 1; #1 d = 0; #1 cp = 0; #1;
    `CHECK(q[0] == 0 && q[2] == 0 && q[1] == 1 && q[3] == 1, "both edges");
    `CHECK(tq == q, "TQ follows Q");
    te = 1; ti = 1; #1 cp = 1; #1 `CHECK(q[0] && q[1] && q[3], "scan TI"); cp = 0; #1 `CHECK(q[2], "scan TI neg");
    te = 0; rstn = 0; #1 `CHECK(q[1] == 0, "async reset"); rstn = 1;
    // retention: q[3] is 1; sleep, clock in 0, wake: still 1
    sleep = 1; #1 `CHECK(q[3] == 0, "sleep output off");
    d = 0; #1 cp = 1; #1 cp = 0; #1;
    sleep = 0; #1 `CHECK(q[3] == 1, "retained through sleep");
    #1 cp = 1; #1 `CHECK(q[3] == 0, "clock works after wake");
    `TB_FINISH
  end
endmodule
