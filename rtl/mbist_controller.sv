// mbist_controller: central memory BIST controller.
//
// Started by a rising edge on start (a register bit of the top register
// bank), it runs March C- over all 2**MEM_AW addresses, broadcasting one
// operation per clock to every memory wrapper through pipe_mbg:
//   M0 any  (w0)   M1 up (r0,w1)   M2 up (r1,w0)
//   M3 down (r0,w1) M4 down (r1,w0) M5 any (r0)
// ("0" is the data background, "1" its inverse). That is 10*2**MEM_AW
// operations. After the last one it waits for the pipeline and the compare
// (PIPE_STAGES+2 clocks), then raises done and presents fail = OR of the bad
// flags of the NMEM memories, with their individual flags on bad. done stays
// high until the next start. clear pulses at start to reset the wrapper
// flags. The document gives the purpose (algorithms for all memories, a bad
// signal per memory); the choice of March C- is this design's.
module mbist_controller
  import tc_pkg::*;
#(
  parameter int unsigned NMEM        = 3,
  parameter int unsigned PIPE_STAGES = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NMEM-1:0]   bad_in,
  output logic              en,
  output logic              we,
  output logic              re,
  output logic              inv,
  output logic [MEM_AW-1:0] addr,
  output logic              clear,
  output logic              busy,
  output logic              done,
  output logic              fail,
  output logic [NMEM-1:0]   bad
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;
  localparam int unsigned DRAIN = PIPE_STAGES + 2;

  state_e      state;
  logic [2:0]  elem;
  logic        phase;
  logic [3:0]  drain_cnt;
  logic        start_d;
  logic        down, two_ops, last_addr, elem_end;

  assign down      = (elem == 3'd3) || (elem == 3'd4);
  assign two_ops   = (elem >= 3'd1) && (elem <= 3'd4);
  assign last_addr = down ? (addr == '0) : (addr == '1);
  assign elem_end  = last_addr && (!two_ops || phase);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= S_IDLE;
      elem      <= '0;
      phase     <= 1'b0;
      addr      <= '0;
      drain_cnt <= '0;
      start_d   <= 1'b0;
      bad       <= '0;
    end else begin
      start_d <= start;
      unique case (state)
        S_IDLE, S_DONE:
          if (start && !start_d) begin
            state <= S_RUN;
            elem  <= '0;
            phase <= 1'b0;
            addr  <= '0;
          end
        S_RUN: begin
          if (two_ops && !phase) phase <= 1'b1;
          else begin
            phase <= 1'b0;
            if (elem_end) begin
              if (elem == 3'd5) begin
                state     <= S_DRAIN;
                drain_cnt <= 4'(DRAIN);
              end else begin
                elem <= elem + 1'b1;
                addr <= (elem == 3'd2 || elem == 3'd3) ? '1 : '0;  // M3, M4 run downwards
              end
            end else
              addr <= down ? addr - 1'b1 : addr + 1'b1;
          end
        end
        S_DRAIN:
          if (drain_cnt == 4'd1) begin
            state <= S_DONE;
            bad   <= bad_in;
          end else
            drain_cnt <= drain_cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end

  // operation of the current step
  always_comb begin
    en  = (state == S_RUN);
    we  = 1'b0;
    re  = 1'b0;
    inv = 1'b0;
    if (en) begin
      unique case (elem)
        3'd0: begin we = 1'b1; inv = 1'b0; end
        3'd1: begin we = phase; re = !phase; inv = phase;  end
        3'd2: begin we = phase; re = !phase; inv = !phase; end
        3'd3: begin we = phase; re = !phase; inv = phase;  end
        3'd4: begin we = phase; re = !phase; inv = !phase; end
        default: begin re = 1'b1; inv = 1'b0; end
      endcase
    end
  end

  assign clear = start && !start_d && (state == S_IDLE || state == S_DONE);
  assign busy  = (state == S_RUN) || (state == S_DRAIN);
  assign done  = (state == S_DONE);
  assign fail  = done && (|bad);

  initial assert (DRAIN < 16) else $error("mbist_controller: PIPE_STAGES too large");
endmodule
