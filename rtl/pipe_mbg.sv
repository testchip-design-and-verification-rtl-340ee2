// pipe_mbg: data-background generator (MBG) and pipeline (PIPE) between the
// BIST controller and the memory blocks.
//
// The controller issues abstract operations (address, write/read, and
// whether the data is the background or its inverse). MBG turns them into
// data words from the selected background:
//   bg_sel 0  solid:         all zeros
//   bg_sel 1  checkerboard:  0101... on even addresses, 1010... on odd
//   bg_sel 2  row stripe:    all bits equal to address bit 0
//   bg_sel 3  column stripe: 0101... on every address
// then inverted if inv is set. The finished bist_op_t passes through STAGES
// register stages so the wide broadcast can run at a fast clock. The
// document names the two functions only; the background set and the stage
// count (1) are this design's choice.
module pipe_mbg
  import tc_pkg::*;
#(
  parameter int unsigned STAGES = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        bg_sel,
  input  logic              en,
  input  logic              we,
  input  logic              re,
  input  logic              inv,
  input  logic [MEM_AW-1:0] addr,
  output bist_op_t          op
);
  localparam logic [MEM_DW-1:0] ALT = {(MEM_DW/2){2'b01}};

  bist_op_t          op_c;
  logic [MEM_DW-1:0] bg;
  bist_op_t          pipe [STAGES+1];

  always_comb begin
    unique case (bg_sel)
      2'd0: bg = '0;
      2'd1: bg = addr[0] ? ~ALT : ALT;
      2'd2: bg = {MEM_DW{addr[0]}};
      default: bg = ALT;
    endcase
    op_c = '{en: en, we: we, re: re, addr: addr, data: inv ? ~bg : bg};
  end

  assign pipe[0] = op_c;
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) pipe[s+1] <= '0;
      else        pipe[s+1] <= pipe[s];
  end
  assign op = pipe[STAGES];
endmodule
