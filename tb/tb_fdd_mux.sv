// tb_fdd_mux: MUX_CTRL[13:8] selects one of 36 bits; beyond 35 gives 0.
`include "tb_util.svh"
module tb_fdd_mux;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  logic [MUXCTL_W-1:0] mux_ctrl; logic [35:0] qout; logic muxout;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 1000)
  fdd_mux dut (.*);
  initial begin
    for (int i = 0; i < 300; i++) begin
      int s = $urandom_range(0, 63);
      qout = {4'($urandom), $urandom}; mux_ctrl = 14'($urandom); mux_ctrl[13:8] = 6'(s); #1;
      `CHECK(muxout == (s < 36 ? qout[s] : 1'b0), "select");
    end
    `TB_FINISH
  end
endmodule
