// tb_ref_cell: random test of the reference cell. Checks MUXOUT against the
// bypass-mux rule and Q one clock later against TE ? TI : MUXOUT.
`include "tb_util.svh"
module tb_ref_cell;
  `TB_COUNTERS
  logic cp = 0, cut_out, bypass_data, bypass_sel, te, ti, muxout, q, exp_q;
  always #5 cp = ~cp;
  `TB_WATCHDOG(cp, 1000)
  ref_cell dut (.*);
  initial begin
    for (int i = 0; i < 200; i++) begin
      @(negedge cp);
      {cut_out, bypass_data, bypass_sel, te, ti} = 5'($urandom);
      #1 `CHECK(muxout == (bypass_sel ? bypass_data : cut_out), "muxout");
      exp_q = te ? ti : (bypass_sel ? bypass_data : cut_out);
      @(posedge cp); #1 `CHECK(q == exp_q, "q");
    end
    `TB_FINISH
  end
endmodule
