// bus_or: a relay bus with N sources of W bits.
//
// Each source reaches the bus through its own enable circuit; all enabled
// contacts are wired together, so the bus carries the OR of the enabled
// sources and 0 when none is enabled. Used for the 8-bit data bus and the
// 16-bit address bus. The control unit enables at most one source at a
// time (the top checks this with an assertion); combinational.
module bus_or #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]        en,
  input  logic [N-1:0][W-1:0] src,
  output logic [W-1:0]        q
);
  logic [N-1:0][W-1:0] gated;
  for (genvar i = 0; i < N; i++) begin : g_src
    bus_enable #(.W(W)) u_en (.en(en[i]), .d(src[i]), .q(gated[i]));
  end
  always_comb begin
    q = '0;
    for (int i = 0; i < N; i++) q |= gated[i];
  end
endmodule
