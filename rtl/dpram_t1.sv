// dpram_t1: behavioural model of the type-1 dual-port SRAM macro (kind:
// behavioural_model of a process-specific memory macro).
//
// One data input bus, separate write and read address buses, separate write
// and read clocks and chip selects, and a single WEN. A write happens on the
// rising edge of WCLK when WCSN and WEN are low; a read on the rising edge of
// RCLK when RCSN is low (one clock latency, Q holds otherwise). WEN only
// gates the write port, so a read and a write can happen in the same cycle,
// which is this model's reading of "one write enable common for both".
// SLEEP, INITN and TM as in spram. 256 x 16 is this design's choice.
module dpram_t1 #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 16
) (
  input  logic          wclk,
  input  logic          rclk,
  input  logic          initn,
  input  logic          sleep,
  input  logic          tm,
  input  logic          wcsn,
  input  logic          rcsn,
  input  logic          wen,
  input  logic [AW-1:0] wa,
  input  logic [AW-1:0] ra,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] q_r;

  always_ff @(posedge wclk)
    if (!sleep && !wcsn && !wen) mem[wa] <= d;

  always_ff @(posedge rclk or negedge initn)
    if (!initn)               q_r <= '0;
    else if (!sleep && !rcsn) q_r <= mem[ra];

  assign q = sleep ? '0 : q_r;

  logic unused_tm;
  assign unused_tm = tm;
endmodule
