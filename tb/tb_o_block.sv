// tb_o_block: 2 groups x 4 instances; every select picks its pair, an
// out-of-range select gives 0.
`include "tb_util.svh"
module tb_o_block;
  `TB_COUNTERS
  logic clk = 0;
  logic [31:0] gdout; logic [7:0] o_sel; logic [1:0] dout;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 1000)
  o_block #(.NGROUP(2), .NINST(4), .SEL_W(8)) dut (.*);
  initial begin
    for (int i = 0; i < 200; i++) begin
      gdout = $urandom; o_sel = 8'($urandom_range(0, 20)); #1;
      `CHECK(dout == (o_sel < 16 ? gdout[2*o_sel +: 2] : 2'b00), "select");
    end
    `TB_FINISH
  end
endmodule
