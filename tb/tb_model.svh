// tb_model.svh: independent reference model of the modelled library cells
// for the testbenches: truth tables of the 12 COMBO cells.
`ifndef TB_MODEL_SVH
`define TB_MODEL_SVH
function automatic logic model_combo(int c, logic [2:0] a);
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
`endif
