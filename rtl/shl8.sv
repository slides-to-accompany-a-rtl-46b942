// shl8: circular left shift by one bit.
//
// Bit i of the result is bit i-1 of B and bit 0 is bit W-1: nothing is lost,
// the top bit wraps around. In relay form this is only wiring. Combinational.
module shl8 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] q
);
  assign q = {b[W-2:0], b[W-1]};
endmodule
