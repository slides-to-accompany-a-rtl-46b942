// inc16: 16-bit incrementer on the address bus.
//
// q = a + 1, wrapping from 16'hFFFF to 0. It feeds the Inc register, which
// advances the program counter during instruction fetch and implements the
// 16-bit increment instruction XY <- XY + 1. Built as a half-adder chain
// (carry in 1), i.e. the full adder with one input tied to 0. Combinational.
module inc16 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] q
);
  logic [W:0] cy;
  assign cy[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_ha
    assign q[i]    = a[i] ^ cy[i];
    assign cy[i+1] = a[i] & cy[i];
  end
endmodule
