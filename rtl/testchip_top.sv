// testchip_top: top level of the standard-cell and memory test chip.
//
// The tester first loads the top register bank (BLOCKSEL, library select,
// mode bits) through rb_load/rb_addr/rb_data, then drives the general input
// pins. Input muxing hands the pins to the block whose BLOCKSEL bit is set,
// clock assembly gives that block its clock, and output muxing brings its
// outputs to the output pins. Blocks (index = BLOCKSEL bit):
//   0 ALLCELL standard-cell block (2 groups with OLT controllers)
//   1 FDD block (1024 units of a 36-cell library)
//   2 retention block (same architecture, retention flops)
//   3 single-port SRAM, 4 dual-port type 1, 5 dual-port type 2 memblocks
// The memory BIST controller and PIPE-MBG run on clk_in[0] and broadcast to
// all memblocks; bist_done/bist_fail are dedicated outputs.
//
// Input pin map (pins[79:0]):
//   ALLCELL/FDD/RET: [9:0] CUT_DATA1, [19:10] CUT_DATA2, [33:20] MUX_CTRL,
//                    [34] TI, [35] TE, [36] bypass data, [37] bypass select,
//                    FDD/RET only: [73:38] TI[35:0] of the first unit
//   memblocks:       [25:0] port 1 {CSN, WEN, A[7:0], D[15:0]}, [51:26] port 2
// Output pin map (dout[39:0]):
//   ALLCELL: [1:0] {QOUT, MUXOUT}, [2] scan out, [4:3] BBAD, [6:5] BEND
//   FDD/RET: [35:0] ends of the 36 cell chains, [36] MUXOUT of unit 0,
//            [37] reference chain scan out
//   memblocks: [15:0] Q port 1, [31:16] Q port 2, [32] BIST bad flag
// Both ALLCELL clocks CP[0] and CP[1] come from the block's one assembled
// clock. The pin maps, the single clock per block and the selection of the
// blocks present are this design's choices; the block list follows the
// document's architecture figure without the PLL, RO chains, analog block
// and boundary scan, which are not built.
module testchip_top
  import tc_pkg::*;
#(
  parameter int unsigned IN_W       = 80,
  parameter int unsigned OUT_W      = 40,
  parameter int unsigned NGROUP     = 2,
  parameter int unsigned NINST      = 4,
  parameter int unsigned OLT_DATA_W = CUT_W,
  parameter int unsigned FDD_NUNIT  = 1024,
  parameter int unsigned RET_NUNIT  = 1024
) (
  input  logic [1:0]       clk_in,
  input  logic             rst_n,
  input  logic             rb_load,
  input  logic [1:0]       rb_addr,
  input  logic [15:0]      rb_data,
  output logic [15:0]      rb_rdata,
  input  logic [IN_W-1:0]  pins,
  output logic [OUT_W-1:0] dout,
  output logic             bist_done,
  output logic             bist_fail
);
  regbank_t         rb;
  logic [NBLK-1:0]  bclk;
  logic [IN_W-1:0]  bin  [NBLK];
  logic [OUT_W-1:0] bout [NBLK];

  top_regbank u_regs (
    .clk(clk_in[0]), .rst_n, .load(rb_load), .addr(rb_addr), .data(rb_data),
    .rb, .rdata(rb_rdata)
  );

  clk_assembly #(.NBLK(NBLK)) u_clks (
    .clk_in, .clk_sel(rb.clk_sel), .blocksel(rb.blocksel), .blk_clk(bclk)
  );

  input_muxing #(.NBLK(NBLK), .W(IN_W)) u_imux (
    .pins, .blocksel(rb.blocksel), .blk_in(bin)
  );

  output_muxing #(.NBLK(NBLK), .W(OUT_W)) u_omux (
    .blk_out(bout), .blocksel(rb.blocksel), .pads(dout)
  );

  // ---------------- ALLCELL ----------------
  logic [1:0]        ac_dout;
  logic              ac_so;
  logic [NGROUP-1:0] ac_bbad, ac_bend;

  allcell_top #(.NGROUP(NGROUP), .NINST(NINST), .OLT_DATA_W(OLT_DATA_W)) u_allcell (
    .cp({bclk[BLK_ALLCELL], bclk[BLK_ALLCELL]}), .rst_n, .olt_en(rb.olt_en),
    .cut_data1(bin[BLK_ALLCELL][9:0]), .cut_data2(bin[BLK_ALLCELL][19:10]),
    .mux_ctrl(bin[BLK_ALLCELL][33:20]),
    .tctrl('{te: bin[BLK_ALLCELL][35], ti: bin[BLK_ALLCELL][34]}),
    .ctrl('{bypass_sel: bin[BLK_ALLCELL][37], bypass_data: bin[BLK_ALLCELL][36]}),
    .o_sel(rb.lib_sel), .dout(ac_dout), .scan_out(ac_so),
    .bbad(ac_bbad), .bend(ac_bend)
  );
  assign bout[BLK_ALLCELL] = OUT_W'({ac_bend, ac_bbad, ac_so, ac_dout});

  // ---------------- FDD and retention ----------------
  for (genvar r = 0; r < 2; r++) begin : g_fdd
    localparam int unsigned B = (r == 0) ? BLK_FDD : BLK_RET;
    logic [35:0] qo;
    logic        mo, so;
    fdd_block #(.NUNIT(r == 0 ? FDD_NUNIT : RET_NUNIT), .NCELL(36),
                .RETENTION(r == 1)) u_blk (
      .cp(bclk[B]), .tm(rb.fdd_tm), .sleep(r == 1 ? rb.ret_sleep : 1'b0),
      .cut_data1(bin[B][9:0]), .cut_data2(bin[B][19:10]),
      .mux_ctrl(bin[B][33:20]),
      .ctrl('{bypass_sel: bin[B][37], bypass_data: bin[B][36]}),
      .tctrl('{te: bin[B][35], ti: bin[B][34]}),
      .ti_in(bin[B][73:38]), .qout(qo), .muxout0(mo), .ref_scan_out(so)
    );
    assign bout[B] = OUT_W'({so, mo, qo});
  end

  // ---------------- memories and BIST ----------------
  logic              bist_busy;
  logic              b_en, b_we, b_re, b_inv, b_clr;
  logic [MEM_AW-1:0] b_addr;
  bist_op_t          op;
  logic [2:0]        mbad;
  logic [2:0]        bad_latched;

  mbist_controller #(.NMEM(3), .PIPE_STAGES(1)) u_bist (
    .clk(clk_in[0]), .rst_n, .start(rb.bist_start), .bad_in(mbad),
    .en(b_en), .we(b_we), .re(b_re), .inv(b_inv), .addr(b_addr),
    .clear(b_clr), .busy(bist_busy), .done(bist_done), .fail(bist_fail),
    .bad(bad_latched)
  );

  pipe_mbg #(.STAGES(1)) u_pipe (
    .clk(clk_in[0]), .rst_n, .bg_sel(rb.bg_sel), .en(b_en), .we(b_we),
    .re(b_re), .inv(b_inv), .addr(b_addr), .op
  );

  for (genvar m = 0; m < 3; m++) begin : g_mem
    localparam int unsigned B = BLK_MEM_SP + m;
    logic [MEM_DW-1:0] q1, q2;
    memblock #(.MKIND(m)) u_mb (
      .clk1(bclk[B]), .clk2(bclk[B]), .rst_n, .ig(rb.ig), .sleep(rb.mem_sleep),
      .initn(!rb.mem_init), .tm(rb.mem_tm),
      .p1(mem_port_t'(bin[B][25:0])), .p2(mem_port_t'(bin[B][51:26])),
      .op, .bist_clr(b_clr), .q1, .q2, .bad(mbad[m])
    );
    assign bout[B] = OUT_W'({bad_latched[m], q2, q1});
  end
endmodule
