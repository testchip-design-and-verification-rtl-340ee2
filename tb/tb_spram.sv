// tb_spram: random reads and writes against a shadow array; sleep, chip
// select and INITN behaviour. Read data appears one clock after the access.
`include "tb_util.svh"
module tb_spram;
  `TB_COUNTERS
  logic clk = 0, initn = 0, sleep = 0, tm = 0, csn = 1, wen = 1;
  logic [7:0] a; logic [15:0] d, q;
  logic [15:0] shadow [256]; bit valid [256];
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 5000)
  spram dut (.*);
  initial begin
    a = 0; d = 0;
    @(negedge clk); `CHECK(q == 0, "INITN clears Q"); initn = 1;
    for (int i = 0; i < 256; i++) begin @(negedge clk); csn = 0; wen = 0; a = 8'(i); d = 16'($urandom); shadow[i] = d; end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a = 8'($urandom); csn = 0; wen = i[0] ^ i[3]; d = 16'($urandom);
      if (!wen) shadow[a] = d;
      else begin @(negedge clk); csn = 1; `CHECK(q == shadow[a], "read data"); end
    end
    // deselected: no write
    @(negedge clk); csn = 1; wen = 0; a = 8'd7; d = ~shadow[7];
    @(negedge clk); csn = 0; wen = 1; @(negedge clk); `CHECK(q == shadow[7], "CSN high blocks write");
    // sleep: access ignored, Q reads 0, content kept
    sleep = 1; wen = 0; d = 16'h0; @(negedge clk); `CHECK(q == 0, "sleep Q=0");
    sleep = 0; wen = 1; @(negedge clk); `CHECK(q == shadow[7], "content kept in sleep");
    `TB_FINISH
  end
endmodule
