// tb_fds: 36 cells with individual clocks and scan inputs. A clock on one
// cell only changes that cell; with TE each cell takes its own TI.
`include "tb_util.svh"
module tb_fds;
  import tc_pkg::*;
  `TB_COUNTERS
  logic [35:0] gclk = '0, ti, q, tq, prev;
  logic [CUT_W-1:0] cut_data1 = '0, cut_data2 = '0; logic sleep = 0;
  logic clk = 0; always #5 clk = ~clk;
  `TB_WATCHDOG(clk, 2000)
  fds #(.NCELL(36)) dut (.*);
  initial begin
    cut_data2[CD2_RSTN] = 1; cut_data2[CD2_FTE] = 1; ti = {4'($urandom), $urandom}; #1;
    gclk = '1; #1 gclk = '0; #1;      // rising then falling: all kinds load TI
    `CHECK(q == ti, "all cells load their TI");
    `CHECK(tq == q, "TQ");
    cut_data2[CD2_FTE] = 0;
    for (int i = 0; i < 20; i++) begin
      int s = $urandom_range(0, 35);
      prev = q; cut_data1[0] = !q[s]; #1;
      gclk[s] = 1; #1 gclk[s] = 0; #1;
      `CHECK(q[s] == cut_data1[0], "selected cell captured D");
      `CHECK((q ^ prev) == (36'd1 << s), "other cells unchanged");
    end
    `TB_FINISH
  end
endmodule
