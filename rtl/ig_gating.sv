// ig_gating: input gating in front of a memory macro (the IG pin).
//
// While ig is high the memory's input pins are blocked: the port is
// deselected (CSN high, WEN high) and address and data are held at 0, so no
// toggling reaches the macro. While ig is low the port passes unchanged.
// Combinational. The document says only that IG blocks the input data; which
// pins are blocked and to what value is this design's choice.
module ig_gating
  import tc_pkg::*;
(
  input  logic      ig,
  input  mem_port_t in,
  output mem_port_t out
);
  always_comb begin
    out = in;
    if (ig) out = '{csn: 1'b1, wen: 1'b1, addr: '0, d: '0};
  end
endmodule
