// logic8: the 8-bit logic circuit of the ALU.
//
// W copies of logic_bit, one per bit position, with no connection between
// bits. Outputs the bitwise NOT of B and the bitwise AND, OR and XOR of B
// and C. Combinational. W defaults to the machine's 8-bit data width.
module logic8 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] o_not,
  output logic [W-1:0] o_and,
  output logic [W-1:0] o_or,
  output logic [W-1:0] o_xor
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    logic_bit u_bit (
      .b(b[i]), .c(c[i]),
      .o_not(o_not[i]), .o_and(o_and[i]), .o_or(o_or[i]), .o_xor(o_xor[i])
    );
  end
endmodule
