// olt_controller: group controller (Gn_CTRL) with the operating-life-test FSM.
//
// Outside OLT (olt_en low) it forwards the buses from the input block to the
// R0 and R90 halves unchanged. With olt_en high it takes over CUT_DATA1 and
// MUX_CTRL: for every input value (a counter over the low DATA_W bits of
// CUT_DATA1) it steps through every cell-type select MUX_CTRL[11:10] and
// every cell select MUX_CTRL[3:0] below NCELL. For each setting it waits one
// clock (APPLY) so the reference flops capture the CUT outputs, then in
// COMPARE checks the outputs of the R0 half against the R90 half, which hold
// the same libraries. Any difference sets the sticky flag bbad. After the
// last setting bend is high for one clock (END) and a new loop starts; this
// repeats for as long as olt_en stays high. During OLT the reference flops
// capture (TE low) and the bypass is off; CUT_DATA2 still comes from the pins.
// One setting takes 2 clocks, a loop 2*2^DATA_W*4*NCELL+1 clocks.
// The document gives the behaviour (increment data, update MUX_CTRL, compare,
// BBAD, BEND, repeat); comparing R0 with R90, the step order and the two-clock
// step are this design's choices. Clocked by the reference clock CP[1];
// rst_n is asynchronous and active low.
module olt_controller
  import tc_pkg::*;
#(
  parameter int unsigned NINST  = 4,
  parameter int unsigned DATA_W = CUT_W,
  parameter int unsigned NCELL  = N_COMBO
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                olt_en,
  input  logic [CUT_W-1:0]    cut_data1_i,
  input  logic [CUT_W-1:0]    cut_data2_i,
  input  logic [MUXCTL_W-1:0] mux_ctrl_i,
  input  ctrl_t               ctrl_i,
  input  test_ctrl_t          tctrl_i,
  input  logic [2*NINST-1:0]  dout1,     // from R0
  input  logic [2*NINST-1:0]  dout2,     // from R90
  output logic [CUT_W-1:0]    cut_data1,
  output logic [CUT_W-1:0]    cut_data2,
  output logic [MUXCTL_W-1:0] mux_ctrl,
  output ctrl_t               ctrl,
  output test_ctrl_t          tctrl,
  output logic                bbad,
  output logic                bend
);
  typedef enum logic [1:0] {S_IDLE, S_APPLY, S_COMPARE, S_END} state_e;

  state_e            state;
  logic [DATA_W-1:0] data;
  logic [TSEL_W-1:0] tsel;
  logic [CSEL_W-1:0] csel;
  logic              last_cell, last_type, last_data;

  assign last_cell = (csel == CSEL_W'(NCELL - 1));
  assign last_type = (tsel == '1);
  assign last_data = (data == '1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      data  <= '0;
      tsel  <= '0;
      csel  <= '0;
      bbad  <= 1'b0;
    end else if (!olt_en) begin
      state <= S_IDLE;
      data  <= '0;
      tsel  <= '0;
      csel  <= '0;
      bbad  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:  state <= S_APPLY;
        S_APPLY: state <= S_COMPARE;
        S_COMPARE: begin
          if (dout1 != dout2) bbad <= 1'b1;
          csel <= last_cell ? '0 : csel + 1'b1;
          if (last_cell) begin
            tsel <= tsel + 1'b1;
            if (last_type) data <= data + 1'b1;
          end
          state <= (last_cell && last_type && last_data) ? S_END : S_APPLY;
        end
        S_END:   state <= S_APPLY;
        default: state <= S_IDLE;
      endcase
    end

  assign bend = (state == S_END);

  always_comb begin
    cut_data1 = cut_data1_i;
    cut_data2 = cut_data2_i;
    mux_ctrl  = mux_ctrl_i;
    ctrl      = ctrl_i;
    tctrl     = tctrl_i;
    if (olt_en) begin
      cut_data1[DATA_W-1:0]          = data;
      mux_ctrl                       = '0;
      mux_ctrl[CSEL_LSB +: CSEL_W]   = csel;
      mux_ctrl[TSEL_LSB +: TSEL_W]   = tsel;
      ctrl.bypass_sel                = 1'b0;
      tctrl.te                       = 1'b0;
    end
  end

  initial assert (DATA_W >= 1 && DATA_W <= CUT_W && NCELL >= 1 && NCELL <= 2**CSEL_W)
    else $error("olt_controller: bad parameters");
endmodule
