// spram: behavioural model of the single-port SRAM macro (kind:
// behavioural_model; the real part is a process-specific memory compiler
// macro).
//
// Pins as in the macro symbol: address bus A, data bus D, CLK, INITN, SLEEP,
// TM, CSN, WEN, output bus Q. Everything happens on the rising edge of CLK:
// with CSN low, WEN low writes D to A and WEN high reads A onto Q (one clock
// of read latency, Q holds between reads). SLEEP high switches the periphery
// off: accesses are ignored and Q reads 0, the array keeps its content.
// INITN low clears the output register (this model's reading of that pin).
// TM (test mode) has no effect in this model. Depth and width are not given
// by the document; 256 x 16 is this design's choice.
module spram #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          initn,
  input  logic          sleep,
  input  logic          tm,
  input  logic          csn,
  input  logic          wen,
  input  logic [AW-1:0] a,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] q_r;

  always_ff @(posedge clk)
    if (!sleep && !csn && !wen) mem[a] <= d;

  always_ff @(posedge clk or negedge initn)
    if (!initn)                      q_r <= '0;
    else if (!sleep && !csn && wen)  q_r <= mem[a];

  assign q = sleep ? '0 : q_r;

  logic unused_tm;
  assign unused_tm = tm;
endmodule
