// offset_adder: ROM1 address = offset of the outer segment (from ROM0) plus
// the inner segment index delta1. Both are unsigned; the sum wraps at AW bits,
// which a correctly generated table never reaches. Combinational.
module offset_adder #(
  parameter int unsigned OFF_W = 6,  // offset width
  parameter int unsigned D1_W  = 6,  // delta1 width
  parameter int unsigned AW    = 6   // ROM1 address width
) (
  input  logic [OFF_W-1:0] offset,
  input  logic [D1_W-1:0]  delta1,
  output logic [AW-1:0]    addr
);

  assign addr = AW'(offset) + AW'(delta1);

endmodule
