// tc_pkg: types and constants shared by the test-chip blocks.
//
// The standard-cell blocks are fed by the same set of buses: CUT_DATA1 and
// CUT_DATA2 (data and special pins of the cells under test, 10 bits each as
// drawn for the FDD block), MUX_CTRL (output selection, bits up to 13 are
// used by the FDD multiplexer), TEST_CTRL (scan input and scan enable) and
// CTRL (bypass select and bypass data of the reference cells). The exact
// bit assignment of CUT_DATA2, CTRL and the low MUX_CTRL bits is this
// design's own choice; MUX_CTRL[11:10] as the cell-type select and
// MUX_CTRL[13:8] as the FDD cell select follow the document.
package tc_pkg;

  localparam int unsigned CUT_W    = 10;  // CUT_DATA1 / CUT_DATA2 width
  localparam int unsigned MUXCTL_W = 14;  // MUX_CTRL width

  // ALLCELL MUX_CTRL fields
  localparam int unsigned CSEL_LSB = 0;   // cell select within one unit
  localparam int unsigned CSEL_W   = 4;
  localparam int unsigned TSEL_LSB = 10;  // cell-type select (COMBO/SEQ/TRI/CBUF)
  localparam int unsigned TSEL_W   = 2;
  // FDD MUX_CTRL fields
  localparam int unsigned FSEL_LSB = 8;   // FDD cell (block) select
  localparam int unsigned FSEL_W   = 6;

  // CUT_DATA2 bit assignment (special pins)
  localparam int unsigned CD2_RSTN   = 0; // active-low reset of sequential CUTs
  localparam int unsigned CD2_TRI_E  = 1; // enable of tri-state CUTs
  localparam int unsigned CD2_CG_E   = 2; // E of clock-gating CUTs
  localparam int unsigned CD2_CG_TE  = 3; // TE of clock-gating CUTs
  localparam int unsigned CD2_FTE    = 4; // scan enable of FDS cells
  localparam int unsigned CD2_TQSEL  = 5; // FDD interface: 1 selects TQ, 0 selects Q

  typedef enum logic [1:0] {
    TYPE_COMBO = 2'd0,
    TYPE_SEQ   = 2'd1,
    TYPE_TRI   = 2'd2,
    TYPE_CBUF  = 2'd3
  } cell_type_e;

  // Combinational cells of the modelled library, one CUT each in COMBO.
  typedef enum logic [3:0] {
    CELL_INV, CELL_BUF, CELL_AND2, CELL_NAND2, CELL_OR2, CELL_NOR2,
    CELL_XOR2, CELL_XNOR2, CELL_MUX2, CELL_AO21, CELL_OA21, CELL_AOI21
  } comb_cell_e;

  localparam int unsigned N_COMBO = 12;
  localparam int unsigned N_SEQ   = 4;
  localparam int unsigned N_TRI   = 2;
  localparam int unsigned N_CBUF  = 2;

  typedef struct packed {
    logic te;   // scan enable of the reference flops
    logic ti;   // scan input of the reference chain
  } test_ctrl_t;

  typedef struct packed {
    logic bypass_sel;   // 1: reference flop D takes bypass data
    logic bypass_data;
  } ctrl_t;

  // Logic function of a combinational CUT; inputs are the shared CUT_DATA1 bits.
  function automatic logic comb_eval(comb_cell_e fn, logic [2:0] a);
    unique case (fn)
      CELL_INV:   return ~a[0];
      CELL_BUF:   return a[0];
      CELL_AND2:  return a[0] & a[1];
      CELL_NAND2: return ~(a[0] & a[1]);
      CELL_OR2:   return a[0] | a[1];
      CELL_NOR2:  return ~(a[0] | a[1]);
      CELL_XOR2:  return a[0] ^ a[1];
      CELL_XNOR2: return ~(a[0] ^ a[1]);
      CELL_MUX2:  return a[2] ? a[1] : a[0];
      CELL_AO21:  return (a[0] & a[1]) | a[2];
      CELL_OA21:  return (a[0] | a[1]) & a[2];
      CELL_AOI21: return ~((a[0] & a[1]) | a[2]);
      default:    return 1'b0;
    endcase
  endfunction

  // Memory BIST operation broadcast by the central controller.
  localparam int unsigned MEM_AW = 8;
  localparam int unsigned MEM_DW = 16;

  typedef struct packed {
    logic              en;    // BIST owns the memory
    logic              we;    // write
    logic              re;    // read and compare
    logic [MEM_AW-1:0] addr;
    logic [MEM_DW-1:0] data;  // write data or expected read data
  } bist_op_t;

  typedef struct packed {
    logic              csn;
    logic              wen;
    logic [MEM_AW-1:0] addr;
    logic [MEM_DW-1:0] d;
  } mem_port_t;

  // Top level: blocks selected by BLOCKSEL[N-1:0]
  localparam int unsigned NBLK = 6;
  typedef enum int unsigned {
    BLK_ALLCELL = 0, BLK_FDD = 1, BLK_RET = 2,
    BLK_MEM_SP = 3, BLK_MEM_DP1 = 4, BLK_MEM_DP2 = 5
  } blk_e;

  // Register bank contents (written 16 bits at a time, see top_regbank)
  typedef struct packed {
    logic [NBLK-1:0] clk_sel;   // per block: 0 clk_in[0], 1 clk_in[1]
    logic [1:0]      bg_sel;    // BIST data background
    logic            mem_tm;
    logic            mem_init;  // drives INITN low
    logic            bist_start;
    logic            mem_sleep;
    logic            ig;
    logic            ret_sleep;
    logic            fdd_tm;
    logic            olt_en;
    logic [7:0]      lib_sel;   // ALLCELL output block select
    logic [NBLK-1:0] blocksel;
  } regbank_t;

endpackage
