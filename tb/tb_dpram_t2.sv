// tb_dpram_t2: two independent ports on different clocks; data written by
// one port is read by the other.
`include "tb_util.svh"
module tb_dpram_t2;
  `TB_COUNTERS
  logic clk1 = 0, clk2 = 0, initn = 0, sleep = 0, tm = 0;
  logic csn1 = 1, csn2 = 1, wen1 = 1, wen2 = 1;
  logic [7:0] a1 = 0, a2 = 0; logic [15:0] d1 = 0, d2 = 0, q1, q2;
  logic [15:0] shadow [256];
  always #5 clk1 = ~clk1;
  always #6 clk2 = ~clk2;
  `TB_WATCHDOG(clk1, 5000)
  dpram_t2 dut (.*);
  initial begin
    #1 initn = 1;
    for (int i = 0; i < 128; i++) begin @(negedge clk1); csn1 = 0; wen1 = 0; a1 = 8'(i); d1 = 16'($urandom); shadow[i] = d1; end
    @(negedge clk1); csn1 = 1;
    for (int i = 128; i < 256; i++) begin @(negedge clk2); csn2 = 0; wen2 = 0; a2 = 8'(i); d2 = 16'($urandom); shadow[i] = d2; end
    @(negedge clk2); csn2 = 1; wen1 = 1; wen2 = 1;
    fork
      for (int i = 0; i < 100; i++) begin
        @(negedge clk1); csn1 = 0; a1 = 8'($urandom_range(128, 255));
        @(negedge clk1); csn1 = 1; `CHECK(q1 == shadow[a1], "port 1 reads port 2 data");
      end
      for (int i = 0; i < 100; i++) begin
        @(negedge clk2); csn2 = 0; a2 = 8'($urandom_range(0, 127));
        @(negedge clk2); csn2 = 1; `CHECK(q2 == shadow[a2], "port 2 reads port 1 data");
      end
    join
    `TB_FINISH
  end
endmodule
