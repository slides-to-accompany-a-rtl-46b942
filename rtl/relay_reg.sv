// relay_reg: a W-bit latching relay register.
//
// Each bit is a relay that, once energised from its bus line, holds itself
// on through one of its own contacts. Loading therefore can only set bits:
// the bus value is ORed into the register, and a separate clear (breaking
// the holding circuit) is needed to bring bits back to 0. Here one strobe
// pulse per sequencer step does both: at a strobe, clr empties the register
// and ld ORs in d (clr and ld together replace the contents with d). A
// register that is cleared in one step and then drives the bus in the next
// therefore puts 0 on the bus; moving a register to itself gives 0.
// Timing: the contents change on the clk edge where strobe is 1; rst is
// synchronous and clears the register.
module relay_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         strobe,
  input  logic         clr,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)         q <= '0;
    else if (strobe) q <= (clr ? '0 : q) | (ld ? d : '0);
  end
endmodule
