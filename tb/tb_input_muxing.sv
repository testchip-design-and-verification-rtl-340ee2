// tb_input_muxing: only selected blocks see the pins.
`include "tb_util.svh"
module tb_input_muxing;
  `TB_COUNTERS
  logic clk = 0; logic [79:0] pins; logic [5:0] blocksel; logic [79:0] blk_in [6];
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 1000)
  input_muxing #(.NBLK(6), .W(80)) dut (.*);
  initial begin
    for (int r = 0; r < 50; r++) begin
      pins = {16'($urandom), $urandom, $urandom}; blocksel = 6'($urandom); #1;
      for (int i = 0; i < 6; i++) `CHECK(blk_in[i] == (blocksel[i] ? pins : 80'b0), "routing");
    end
    `TB_FINISH
  end
endmodule
