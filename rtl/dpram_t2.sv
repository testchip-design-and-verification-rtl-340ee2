// dpram_t2: behavioural model of the type-2 dual-port SRAM macro (kind:
// behavioural_model of a process-specific memory macro).
//
// Two complete, independent ports, each with its own clock, data, address,
// CSN, WEN and output Q, like two single-port memories sharing one array.
// Each port behaves as spram on its own clock. Writes of both ports to the
// same address in the same instant are not resolved by this model (the
// result is that of whichever port is evaluated last). SLEEP, INITN and TM
// as in spram. 256 x 16 is this design's choice. The array is written from
// two clock domains, as a true dual-port macro is; lint reports this as a
// multiply-driven signal, which is expected for this model.
module dpram_t2 #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 16
) (
  input  logic          clk1,
  input  logic          clk2,
  input  logic          initn,
  input  logic          sleep,
  input  logic          tm,
  input  logic          csn1,
  input  logic          csn2,
  input  logic          wen1,
  input  logic          wen2,
  input  logic [AW-1:0] a1,
  input  logic [AW-1:0] a2,
  input  logic [DW-1:0] d1,
  input  logic [DW-1:0] d2,
  output logic [DW-1:0] q1,
  output logic [DW-1:0] q2
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] q1_r, q2_r;

  always @(posedge clk1)
    if (!sleep && !csn1 && !wen1) mem[a1] <= d1;

  always @(posedge clk2)
    if (!sleep && !csn2 && !wen2) mem[a2] <= d2;

  always_ff @(posedge clk1 or negedge initn)
    if (!initn)                     q1_r <= '0;
    else if (!sleep && !csn1 && wen1) q1_r <= mem[a1];

  always_ff @(posedge clk2 or negedge initn)
    if (!initn)                     q2_r <= '0;
    else if (!sleep && !csn2 && wen2) q2_r <= mem[a2];

  assign q1 = sleep ? '0 : q1_r;
  assign q2 = sleep ? '0 : q2_r;

  logic unused_tm;
  assign unused_tm = tm;
endmodule
