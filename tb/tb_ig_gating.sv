// tb_ig_gating: IG high blocks every input to the memory port.
`include "tb_util.svh"
module tb_ig_gating;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0, ig; mem_port_t in, out;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 1000)
  ig_gating dut (.*);
  initial begin
    for (int i = 0; i < 100; i++) begin
      in = mem_port_t'($urandom); ig = i[0]; #1;
      `CHECK(ig ? (out.csn == 1 && out.wen == 1 && out.addr == 0 && out.d == 0) : (out == in), "gating");
    end
    `TB_FINISH
  end
endmodule
