// decoder3to8: one-hot decoder for the ALU function code.
//
// f = {f0, f1, f2} with f0 the most significant bit, as in the published
// truth table: exactly one output y[k] is 1, where k is the value of f.
// Combinational.
module decoder3to8 (
  input  logic [2:0] f,
  output logic [7:0] y
);
  always_comb begin
    y = '0;
    y[f] = 1'b1;
  end
endmodule
