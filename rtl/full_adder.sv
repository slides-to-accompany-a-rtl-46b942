// full_adder: one-bit full adder.
//
// Adds bits B and C and the incoming carry; Sum is the parity of the three
// and Carry out is their majority, as in the published truth table.
// Combinational.
module full_adder (
  input  logic b,
  input  logic c,
  input  logic cy_in,
  output logic sum,
  output logic cy_out
);
  assign sum    = b ^ c ^ cy_in;
  assign cy_out = (b & c) | (b & cy_in) | (c & cy_in);
endmodule
