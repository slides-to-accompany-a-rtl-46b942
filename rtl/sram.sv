// sram: the 32K x 8 static RAM of the relay computer.
//
// BYTES bytes addressed by the low address-bus bits. Reads are
// asynchronous, like the static RAM chip: rdata follows addr. A write
// stores wdata on the rising clk edge when we is 1. In the machine the read
// data reaches the relay data bus through power transistors gated by the
// Mem Read signal; that gating is done outside this module. The contents
// are not initialised; a program is written in through the write port.
module sram #(
  parameter int unsigned BYTES = 32768,
  localparam int unsigned AW   = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end
  assign rdata = mem[addr];
endmodule
