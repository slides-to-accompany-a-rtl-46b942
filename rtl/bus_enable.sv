// bus_enable: enable circuit that connects W lines to a bus.
//
// One Enable signal drives the coils of the relays (two 4-pole relays for
// W = 8) whose contacts pass the W source lines through. With Enable off
// the contacts are open and the outputs are unconnected, which counts as 0,
// so several enabled sources can be wired together into a bus (see
// bus_or). Combinational.
module bus_enable #(
  parameter int unsigned W = 8
) (
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  assign q = d & {W{en}};
endmodule
