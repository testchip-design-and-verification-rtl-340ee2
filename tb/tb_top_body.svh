// tb_top_body.svh: end-to-end test sequence of testchip_top, included by
// tb_testchip_top. The including module defines NGROUP, NINST, OLT_W, FDD_N,
// RET_N, instantiates
// the top as dut and declares the pins below. Every mechanism of the chip
// exercised here is counted in mech[]; one that never happens is a failure.
  import tc_pkg::*;
  `TB_COUNTERS
  logic [1:0] clk_in = '0; logic rst_n = 0, rb_load = 0; logic [1:0] rb_addr = 0;
  logic [15:0] rb_data = 0, rb_rdata; logic [79:0] pins = '0; logic [39:0] dout;
  logic bist_done, bist_fail;
  always #5 clk_in[0] = ~clk_in[0];
  always #7 clk_in[1] = ~clk_in[1];

  typedef enum int { M_BLOCKSEL, M_ALLCELL_FUNC, M_BYPASS, M_SCAN, M_OLT_LOOP, M_OLT_BBAD,
                     M_FDD_SHIFT, M_FDD_GATED, M_RET_SLEEP, M_MEM_RW, M_IG, M_CLKSEL,
                     M_BIST_PASS, M_BIST_FAIL, M_NMECH } mech_e;
  int mech [M_NMECH];
  logic [15:0] mode = '0;

  task automatic rb_wr(int a, logic [15:0] d);
    @(negedge clk_in[0]); rb_load = 1; rb_addr = 2'(a); rb_data = d;
    @(negedge clk_in[0]); rb_load = 0;
  endtask
  task automatic select(logic [5:0] b); rb_wr(0, 16'(b)); mech[M_BLOCKSEL]++; endtask
  task automatic set_mode(int bitpos, logic v); mode[bitpos] = v; rb_wr(2, mode); endtask
  task automatic clk0(int n); repeat (n) @(negedge clk_in[0]); endtask

  // ALLCELL pin helpers
  task automatic ac_pins(logic [9:0] cd1, logic [9:0] cd2, logic [13:0] mc, logic ti, logic te, logic bd, logic bs);
    pins[9:0] = cd1; pins[19:10] = cd2; pins[33:20] = mc; pins[34] = ti; pins[35] = te;
    pins[36] = bd; pins[37] = bs;
  endtask

  localparam int CHAIN = NGROUP * 2 * NINST * 20;
  localparam int LOOP  = 2 * (2 ** OLT_W) * 4 * 12 + 1;

  int t0, t1, period;
  logic [CHAIN-1:0] spat;
  logic [35:0] words [4];
  localparam logic [35:0] SE = 36'hDB6DB6DB6;   // single-edge cells (i % 3 != 0)

  initial begin
    clk0(2); rst_n = 1;
    // register bank
    rb_wr(3, 16'h00_01); rb_addr = 3; #1 `CHECK(rb_rdata == 16'h0001, "register readback");
    rb_wr(3, 16'h0000);

    // ---------------- ALLCELL ----------------
    select(6'b000001);
    for (int i = 0; i < NGROUP * 2 * NINST; i++) begin
      int c = $urandom_range(0, 11);
      logic [9:0] v = 10'($urandom);
      rb_wr(1, 16'(i));
      @(negedge clk_in[0]); ac_pins(v, 10'b11, 14'(c), 0, 0, 0, 0);
      @(negedge clk_in[0]);
      `CHECK(dout[0] == model_combo(c, v[2:0]) && dout[1] == model_combo(c, v[2:0]),
             $sformatf("ALLCELL instance %0d cell %0d", i, c));
      mech[M_ALLCELL_FUNC]++;
    end
    ac_pins('0, 10'b11, '0, 0, 0, 1, 1); #1 `CHECK(dout[0] == 1, "bypass 1");
    ac_pins('0, 10'b11, '0, 0, 0, 0, 1); #1 `CHECK(dout[0] == 0, "bypass 0"); mech[M_BYPASS]++;
    for (int w = 0; w < CHAIN; w += 32) spat[w +: 32] = $urandom;
    for (int i = 0; i < CHAIN; i++) begin ac_pins('0, 10'b11, '0, spat[i], 1, 0, 0); clk0(1); end
    begin
      int errs = 0;
      for (int i = 0; i < CHAIN; i++) begin
        if (dout[2] != spat[i]) errs++;
        ac_pins('0, 10'b11, '0, 0, 1, 0, 0); clk0(1);
      end
      `CHECK(errs == 0, $sformatf("ALLCELL scan chain of %0d (%0d errors)", CHAIN, errs));
      if (errs == 0) mech[M_SCAN]++;
    end
    ac_pins('0, 10'b11, '0, 0, 0, 0, 0);
    // operating life test: two loops, then an injected fault
    set_mode(0, 1);
    @(posedge clk_in[0] iff dout[6:5] == 2'b11); t0 = $time;
    @(posedge clk_in[0]);
    @(posedge clk_in[0] iff dout[6:5] == 2'b11); t1 = $time;
    period = (t1 - t0) / 10;
    `CHECK(period == LOOP, $sformatf("OLT loop %0d clocks, expected %0d", period, LOOP));
    `CHECK(dout[4:3] == 2'b00, "OLT passes on fault-free groups");
    mech[M_OLT_LOOP]++;
    force dut.u_allcell.g_grp[0].u_grp.d90[0] = 1'b1;
    @(posedge clk_in[0] iff dout[6:5] == 2'b11); #1;
    `CHECK(dout[4:3] == 2'b01, "OLT flags the faulty group only");
    if (dout[3]) mech[M_OLT_BBAD]++;
    release dut.u_allcell.g_grp[0].u_grp.d90[0];
    set_mode(0, 0);

    // ---------------- FDD ----------------
    select(6'b000010);
    set_mode(1, 1);                                   // TM: clock to all cells
    pins = '0; pins[10 + 0] = 1; pins[10 + 4] = 1;    // reset released, scan enable
    for (int i = 0; i < FDD_N + 4; i++) begin
      if (i < 4) begin words[i] = {4'($urandom), $urandom}; pins[73:38] = words[i]; end
      else pins[73:38] = '0;
      clk0(1);
      if (i >= FDD_N && i < FDD_N + 3)
        `CHECK((dout[35:0] & SE) == (words[i - FDD_N + 1] & SE), "FDD single-edge chains through all units");
    end
    mech[M_FDD_SHIFT]++;
    // normal mode: only the selected cell of unit 0 is clocked
    set_mode(1, 0);
    pins[10 + 4] = 0; pins[33:20] = 14'(7 << 8); pins[0] = 1; clk0(1);
    #1 `CHECK(dout[36] == 1, "selected FDD cell captured D");
    pins[0] = 0; pins[33:20] = 14'(8 << 8); clk0(1);
    pins[33:20] = 14'(7 << 8); #1 `CHECK(dout[36] == 1, "unselected cell kept");
    mech[M_FDD_GATED]++;

    // ---------------- retention ----------------
    select(6'b000100);
    set_mode(1, 1);
    pins = '0; pins[10 + 4] = 1;
    // fill every unit with one word, sleep, clock other data in, wake: the
    // last unit still shows the word (waking costs at most 2 shifts)
    pins[73:38] = 36'h9_1234_5678; clk0(RET_N + 1);
    set_mode(2, 1);  #1 `CHECK(dout[35:0] == '0, "retention outputs off in sleep");
    pins[73:38] = 36'h6_EDCB_A987; clk0(3);
    set_mode(2, 0);  #1 `CHECK(dout[35:0] == 36'h9_1234_5678, "retention data kept through sleep");
    mech[M_RET_SLEEP]++;
    set_mode(1, 0);

    // ---------------- memories ----------------
    select(6'b001000);
    pins = '0;
    @(negedge clk_in[0]); pins[25:0] = {1'b0, 1'b0, 8'h3C, 16'hCAFE};
    @(negedge clk_in[0]); pins[25:0] = {1'b0, 1'b1, 8'h3C, 16'h0};
    @(negedge clk_in[0]); pins[25:0] = {1'b1, 1'b1, 8'h0, 16'h0};
    `CHECK(dout[15:0] == 16'hCAFE, "SPRAM write/read"); mech[M_MEM_RW]++;
    set_mode(3, 1);
    @(negedge clk_in[0]); pins[25:0] = {1'b0, 1'b0, 8'h3C, 16'h0};
    @(negedge clk_in[0]); pins[25:0] = {1'b1, 1'b1, 8'h0, 16'h0};
    set_mode(3, 0);
    @(negedge clk_in[0]); pins[25:0] = {1'b0, 1'b1, 8'h3C, 16'h0};
    @(negedge clk_in[0]); pins[25:0] = {1'b1, 1'b1, 8'h0, 16'h0};
    `CHECK(dout[15:0] == 16'hCAFE, "IG blocked the write"); mech[M_IG]++;
    // clock select: run the single-port memory on the second clock
    rb_wr(0, 0); rb_wr(3, 16'(1 << (8 + 3))); rb_wr(0, 16'b001000);
    @(negedge clk_in[1]); pins[25:0] = {1'b0, 1'b0, 8'h40, 16'h5A5A};
    @(negedge clk_in[1]); pins[25:0] = {1'b0, 1'b1, 8'h40, 16'h0};
    @(negedge clk_in[1]); pins[25:0] = {1'b1, 1'b1, 8'h0, 16'h0};
    `CHECK(dout[15:0] == 16'h5A5A, "memory on second clock"); mech[M_CLKSEL]++;
    rb_wr(0, 0); rb_wr(3, 16'h0001);                  // clock 0, checkerboard background
    // BIST over all three memories
    select(6'b111000);
    set_mode(5, 1); set_mode(5, 0);
    @(posedge bist_done); #1;
    `CHECK(bist_fail == 0 && dout[32] == 0, "BIST passes"); mech[M_BIST_PASS] += !bist_fail;
    force dut.g_mem[0].u_mb.q1[0] = 1'b0;
    set_mode(5, 1); set_mode(5, 0);
    @(posedge bist_done); #1;
    `CHECK(bist_fail == 1 && dout[32] == 1, "BIST finds a stuck bit in the SPRAM"); mech[M_BIST_FAIL] += bist_fail;
    release dut.g_mem[0].u_mb.q1[0];

    for (int m = 0; m < M_NMECH; m++) begin
      $display("mechanism %s happened %0d times", mech_e'(m), mech[m]);
      `CHECK(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    end
    `TB_FINISH
  end
