// tb_out_mux_wrapper: all select values with random inputs.
`include "tb_util.svh"
module tb_out_mux_wrapper;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0;
  logic [3:0] muxout_in, qout_in; cell_type_e type_sel; logic [1:0] dout;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 1000)
  out_mux_wrapper dut (.*);
  initial begin
    for (int i = 0; i < 100; i++) begin
      {muxout_in, qout_in} = 8'($urandom); type_sel = cell_type_e'(i % 4);
      #1 `CHECK(dout == {qout_in[i%4], muxout_in[i%4]}, "dout");
    end
    `TB_FINISH
  end
endmodule
