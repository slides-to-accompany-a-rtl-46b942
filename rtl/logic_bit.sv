// logic_bit: one bit of the ALU's logic section.
//
// Produces NOT b, b AND c, b OR c and b XOR c from one bit of register B and
// one bit of register C, matching the published 1-bit truth table (NOT is
// taken of b only). NOT and OR use the relay NOT and OR circuits; AND and
// XOR, whose relay wiring is not reproduced here, are written as logic
// expressions. Combinational.
module logic_bit (
  input  logic b,
  input  logic c,
  output logic o_not,
  output logic o_and,
  output logic o_or,
  output logic o_xor
);
  not_gate u_not (.in_b(b), .out_b(o_not));
  or_gate  u_or  (.b(b), .c(c), .y(o_or));
  assign o_and = b & c;
  assign o_xor = b ^ c;
endmodule
