// top_regbank: top register bank of the test chip.
//
// Holds BLOCKSEL[N-1:0] (one bit per block), the library/output select of
// the ALLCELL block and the mode bits that enable the blocks and start
// their tests. The tester loads it through dedicated pins: on a rising clk
// edge with load high, data is written to register addr:
//   0  BLOCKSEL[5:0]   (bit per tc_pkg::blk_e)
//   1  LIBSEL[7:0]     (ALLCELL o_block select)
//   2  mode: [0] olt_en [1] fdd_tm [2] ret_sleep [3] ig [4] mem_sleep
//            [5] bist_start [6] mem_init [7] mem_tm
//   3  [1:0] bg_sel, [13:8] clk_sel (per block)
// Unused data bits are ignored. rst_n (asynchronous, active low) clears all
// registers. The registers are read back on rdata at address addr. The
// document gives the purpose and BLOCKSEL; the map is this design's.
module top_regbank
  import tc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [1:0]  addr,
  input  logic [15:0] data,
  output regbank_t    rb,
  output logic [15:0] rdata
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rb <= '0;
    else if (load)
      unique case (addr)
        2'd0: rb.blocksel <= data[NBLK-1:0];
        2'd1: rb.lib_sel  <= data[7:0];
        2'd2: {rb.mem_tm, rb.mem_init, rb.bist_start, rb.mem_sleep, rb.ig,
               rb.ret_sleep, rb.fdd_tm, rb.olt_en} <= data[7:0];
        default: begin
          rb.bg_sel  <= data[1:0];
          rb.clk_sel <= data[8 +: NBLK];
        end
      endcase

  always_comb
    unique case (addr)
      2'd0: rdata = 16'(rb.blocksel);
      2'd1: rdata = 16'(rb.lib_sel);
      2'd2: rdata = 16'({rb.mem_tm, rb.mem_init, rb.bist_start, rb.mem_sleep,
                         rb.ig, rb.ret_sleep, rb.fdd_tm, rb.olt_en});
      default: rdata = {2'b00, rb.clk_sel, 6'b0, rb.bg_sel};
    endcase
endmodule
