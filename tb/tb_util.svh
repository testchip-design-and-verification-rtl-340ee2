// tb_util.svh: check counting and watchdog shared by the testbenches.
// A testbench declares `TB_COUNTERS, uses `CHECK(cond, msg) and calls
// `TB_FINISH at the end; `TB_WATCHDOG(clk, n) ends the run with a failure if
// n clock cycles pass first.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define TB_COUNTERS int checks = 0; int failures = 0;
`define CHECK(c, m) begin checks++; if (!(c)) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end end
`define TB_FINISH begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define TB_WATCHDOG(clk, n) initial begin repeat (n) @(posedge clk); failures++; $display("FAIL watchdog"); `TB_FINISH end
`endif
