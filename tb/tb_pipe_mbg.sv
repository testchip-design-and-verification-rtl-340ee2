// tb_pipe_mbg: the four data backgrounds, inversion, and one clock of
// pipeline delay.
`include "tb_util.svh"
module tb_pipe_mbg;
  import tc_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, en, we, re, inv; logic [1:0] bg_sel; logic [7:0] addr;
  bist_op_t op; logic [15:0] exp_d;
  always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 1000)
  pipe_mbg #(.STAGES(1)) dut (.*);
  function automatic logic [15:0] bgf(int s, logic [7:0] a);
    case (s)
      0: return 16'h0000;
      1: return a[0] ? 16'hAAAA : 16'h5555;
      2: return a[0] ? 16'hFFFF : 16'h0000;
      default: return 16'h5555;
    endcase
  endfunction
  initial begin
    {en, we, re, inv, bg_sel, addr} = '0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      {en, we, re, inv} = 4'($urandom); bg_sel = 2'($urandom); addr = 8'($urandom);
      exp_d = bgf(bg_sel, addr) ^ {16{inv}};
      @(posedge clk); #1;
      `CHECK(op.en == en && op.we == we && op.re == re && op.addr == addr && op.data == exp_d, "op after 1 clock");
    end
    `TB_FINISH
  end
endmodule
