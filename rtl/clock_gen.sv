// clock_gen: the four-phase relay clock.
//
// Four relays A, B, C, D form a ring: B follows A, C follows B, D follows
// C, and A follows the inverse of D, each with one relay delay. Starting
// from all released the phases run 0000, 1000, 1100, 1110, 1111, 0111,
// 0011, 0001 ({A,B,C,D}) and repeat, one step every DIV clk cycles while
// run is 1. The machine clock is Clock = (A and B) or (C and D), the
// published equation; with this ring it is high for five of the eight
// steps. The ring itself is this design's reading of the oscillator.
// tick is a one-clk-cycle pulse in the cycle after Clock rises; it is the
// strobe on which the sequencer advances and the registers load, so there
// is one tick every 8*DIV clk cycles. rst (synchronous) releases all relays.
module clock_gen #(
  parameter int unsigned DIV = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       run,
  output logic [3:0] ph,     // {A, B, C, D}
  output logic       clock,
  output logic       tick
);
  logic a, b, c, d, clock_q;
  int unsigned div_cnt;
  logic step;

  assign step = run && (div_cnt == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      {a, b, c, d} <= '0;
      div_cnt      <= 0;
      clock_q      <= 1'b0;
    end else begin
      if (run) div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
      if (step) begin
        a <= ~d;
        b <= a;
        c <= b;
        d <= c;
      end
      clock_q <= clock;
    end
  end

  assign ph    = {a, b, c, d};
  assign clock = (a & b) | (c & d);
  assign tick  = clock & ~clock_q;
endmodule
