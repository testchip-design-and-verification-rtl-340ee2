// tb_output_muxing: the lowest selected block drives the pads.
`include "tb_util.svh"
module tb_output_muxing;
  `TB_COUNTERS
  logic clk = 0; logic [39:0] blk_out [6]; logic [5:0] blocksel; logic [39:0] pads, exp_p;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 1000)
  output_muxing #(.NBLK(6), .W(40)) dut (.*);
  initial begin
    for (int r = 0; r < 100; r++) begin
      for (int i = 0; i < 6; i++) blk_out[i] = {8'($urandom), $urandom};
      blocksel = 6'($urandom); #1;
      exp_p = '0;
      for (int i = 0; i < 6; i++) if (blocksel[i]) begin exp_p = blk_out[i]; break; end
      `CHECK(pads == exp_p, "selection");
    end
    `TB_FINISH
  end
endmodule
