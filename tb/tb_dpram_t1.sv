// tb_dpram_t1: simultaneous write (write port) and read (read port) on two
// clocks, against a shadow array.
`include "tb_util.svh"
module tb_dpram_t1;
  `TB_COUNTERS
  logic wclk = 0, rclk = 0, initn = 0, sleep = 0, tm = 0, wcsn = 1, rcsn = 1, wen = 1;
  logic [7:0] wa, ra; logic [15:0] d, q;
  logic [15:0] shadow [256];
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  `TB_WATCHDOG(wclk, 5000)
  dpram_t1 dut (.*);
  initial begin
    wa = 0; ra = 0; d = 0; #1 initn = 1;
    for (int i = 0; i < 256; i++) begin @(negedge wclk); wcsn = 0; wen = 0; wa = 8'(i); d = 16'($urandom); shadow[i] = d; end
    @(negedge wclk); wcsn = 1; wen = 1;
    // reads while writing elsewhere
    fork
      for (int i = 0; i < 300; i++) begin
        @(negedge wclk); wcsn = 0; wen = 0; wa = 8'($urandom_range(128, 255)); d = 16'($urandom); shadow[wa] = d;
      end
      for (int i = 0; i < 200; i++) begin
        @(negedge rclk); rcsn = 0; ra = 8'($urandom_range(0, 127));
        @(negedge rclk); rcsn = 1; `CHECK(q == shadow[ra], "read port");
      end
    join
    `TB_FINISH
  end
endmodule
