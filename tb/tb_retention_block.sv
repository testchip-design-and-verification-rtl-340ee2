// tb_retention_block: the FDD architecture with retention cells, 4 units.
// Data shifted in before SLEEP is still there after SLEEP, even though clocks
// (carrying other data) were applied during SLEEP; outputs read 0 in SLEEP.
`include "tb_util.svh"
module tb_retention_block;
  import tc_pkg::*;
  `TB_COUNTERS
  localparam int N = 4;
  logic cp = 0, tm = 1, sleep = 0;
  logic [CUT_W-1:0] cut_data1 = '0, cut_data2 = '0;
  logic [MUXCTL_W-1:0] mux_ctrl = '0; ctrl_t ctrl = '0; test_ctrl_t tctrl = '0;
  logic [35:0] ti_in, qout; logic muxout0, ref_scan_out;
  logic [35:0] words [N];
  `TB_WATCHDOG(cp, 2000)
  fdd_block #(.NUNIT(N), .NCELL(36), .RETENTION(1'b1)) dut (.*);
  task automatic pulse(); #2 cp = 1; #2 cp = 0; #2; endtask
  initial begin
    cut_data2[CD2_FTE] = 1;
    for (int i = 0; i < N; i++) begin words[i] = {4'($urandom), $urandom}; ti_in = words[i]; pulse(); end
    sleep = 1; #1 `CHECK(qout == '0, "outputs off in sleep");
    ti_in = '1; repeat (3) pulse();
    sleep = 0; #1 `CHECK(qout == words[0], "retained after sleep");
    for (int i = 1; i < N; i++) begin ti_in = '0; pulse(); `CHECK(qout == words[i], "retained chain"); end
    `TB_FINISH
  end
endmodule
