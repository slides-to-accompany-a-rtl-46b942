// adder8: ripple-carry adder of W full adders (W = 8).
//
// Bit i's carry out feeds bit i+1's carry in; the carry out of the top bit
// is the Carry output. A carry input to bit 0 is provided so that the ALU
// can compute B+1 with the same adder (this input is this design's
// addition). Combinational.
module adder8 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cy_in,
  output logic [W-1:0] sum,
  output logic         carry
);
  logic [W:0] cy;
  assign cy[0] = cy_in;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.b(b[i]), .c(c[i]), .cy_in(cy[i]), .sum(sum[i]), .cy_out(cy[i+1]));
  end
  assign carry = cy[W];
endmodule
