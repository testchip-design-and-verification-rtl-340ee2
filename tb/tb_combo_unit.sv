// tb_combo_unit: exhaustive test of the COMBO unit. For all 8 input values
// and every cell select, MUXOUT must equal the cell's truth table (written
// here independently), QOUT must equal it one clock later; the bypass path
// and a full scan shift through the 12 reference flops are checked too.
`include "tb_util.svh"
module tb_combo_unit;
  import tc_pkg::*;
  `TB_COUNTERS
  logic cp_ref = 0;
  logic [CUT_W-1:0] cut_data1;
  ctrl_t ctrl; test_ctrl_t tctrl;
  logic [CSEL_W-1:0] sel;
  logic muxout, qout, scan_out;
  always #5 cp_ref = ~cp_ref;
  `TB_WATCHDOG(cp_ref, 5000)
  combo_unit dut (.*);

  function automatic logic ref_fn(int c, logic [2:0] a);
    logic x = a[0], y = a[1], z = a[2];
    case (c)
      0: return !x;        1: return x;
      2: return x && y;    3: return !(x && y);
      4: return x || y;    5: return !(x || y);
      6: return x != y;    7: return x == y;
      8: return z ? y : x; 9: return (x && y) || z;
      10: return (x || y) && z; 11: return !((x && y) || z);
      default: return 0;
    endcase
  endfunction

  logic [11:0] pat;
  initial begin
    ctrl = '0; tctrl = '0; sel = '0; cut_data1 = '0;
    for (int v = 0; v < 8; v++)
      for (int c = 0; c < 12; c++) begin
        @(negedge cp_ref);
        cut_data1 = CUT_W'(v); sel = CSEL_W'(c);
        #1 `CHECK(muxout == ref_fn(c, 3'(v)), $sformatf("muxout v=%0d c=%0d", v, c));
        @(posedge cp_ref); #1 `CHECK(qout == ref_fn(c, 3'(v)), "qout");
      end
    // bypass path
    @(negedge cp_ref); ctrl = '{bypass_sel: 1, bypass_data: 1}; sel = 4'd0; cut_data1 = 10'd1;
    #1 `CHECK(muxout == 1'b1, "bypass muxout");
    @(posedge cp_ref); #1 `CHECK(qout == 1'b1, "bypass qout");
    // scan shift: 12 bits in, read back at scan_out after 12 clocks
    pat = 12'hA5C;
    @(negedge cp_ref); ctrl = '0; tctrl.te = 1;
    for (int i = 0; i < 12; i++) begin tctrl.ti = pat[i]; @(negedge cp_ref); end
    for (int i = 0; i < 12; i++) begin
      `CHECK(scan_out == pat[i], $sformatf("scan bit %0d", i));
      tctrl.ti = 0; @(negedge cp_ref);
    end
    `TB_FINISH
  end
endmodule
