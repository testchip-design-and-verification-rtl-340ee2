// tb_top_regbank: writes every register, reads it back, and checks the
// decoded fields and the reset value.
`include "tb_util.svh"
module tb_top_regbank;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, load = 0; logic [1:0] addr = 0; logic [15:0] data = 0, rdata;
  regbank_t rb;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 1000)
  top_regbank dut (.*);
  task automatic wr(int a, logic [15:0] d);
    @(negedge clk); load = 1; addr = 2'(a); data = d; @(negedge clk); load = 0;
  endtask
  initial begin
    #1 `CHECK(rb == '0, "reset");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [15:0] v0 = 16'($urandom), v1 = 16'($urandom), v2 = 16'($urandom), v3 = 16'($urandom);
      wr(0, v0); wr(1, v1); wr(2, v2); wr(3, v3);
      `CHECK(rb.blocksel == v0[5:0] && rb.lib_sel == v1[7:0], "blocksel/libsel");
      `CHECK(rb.olt_en == v2[0] && rb.fdd_tm == v2[1] && rb.ret_sleep == v2[2] && rb.ig == v2[3] &&
             rb.mem_sleep == v2[4] && rb.bist_start == v2[5] && rb.mem_init == v2[6] && rb.mem_tm == v2[7], "mode bits");
      `CHECK(rb.bg_sel == v3[1:0] && rb.clk_sel == v3[13:8], "bg/clk select");
      addr = 0; #1 `CHECK(rdata == {10'b0, v0[5:0]}, "readback 0");
      addr = 3; #1 `CHECK(rdata == {2'b0, v3[13:8], 6'b0, v3[1:0]}, "readback 3");
    end
    `TB_FINISH
  end
endmodule
