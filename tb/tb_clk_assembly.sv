// tb_clk_assembly: counts the clock pulses each block receives for every
// select and enable setting; checks that enabling while the clock is high
// does not produce a short pulse.
`include "tb_util.svh"
module tb_clk_assembly;
  `TB_COUNTERS
  logic [1:0] clk_in = 0; logic [5:0] clk_sel = 0, blocksel = 0, blk_clk;
  int cnt [6];
  always #5 clk_in[0] = ~clk_in[0];
  always #15 clk_in[1] = ~clk_in[1];
  `TB_WATCHDOG(clk_in[0], 3000)
  clk_assembly #(.NBLK(6)) dut (.*);
  for (genvar i = 0; i < 6; i++) begin : g
    always @(posedge blk_clk[i]) cnt[i]++;
  end
  initial begin
    for (int r = 0; r < 8; r++) begin
      @(negedge clk_in[1]);
      blocksel = 6'($urandom); clk_sel = 6'($urandom);
      @(negedge clk_in[1]); #1
      for (int i = 0; i < 6; i++) cnt[i] = 0;
      #300;
      for (int i = 0; i < 6; i++)
        `CHECK(cnt[i] == (!blocksel[i] ? 0 : (clk_sel[i] ? 10 : 30)), $sformatf("pulses blk %0d = %0d", i, cnt[i]));
    end
    blocksel = 0; clk_sel = 0;
    @(posedge clk_in[0]); #1 blocksel[0] = 1; #1 `CHECK(blk_clk[0] == 0, "no clipped pulse");
    `TB_FINISH
  end
endmodule
