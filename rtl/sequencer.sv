// sequencer: the finite state machine that steps through an instruction.
//
// A one-hot chain of STEPS states: state[0] and state[1] are the two fetch
// steps, state[2] onward the execute steps. On every tick the chain moves
// one place; when the control unit flags the current step as the last one
// of the instruction it returns to state[0] instead and done pulses for
// one clk cycle. If halt is 1 at a tick the chain stops, halted is set and
// only rst restarts it. All changes happen on the clk edge where tick is
// 1; rst (synchronous) puts the chain in state[0]. The number of steps and
// the one-hot form are this design's choices.
module sequencer #(
  parameter int unsigned STEPS = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic             last,
  input  logic             halt,
  output logic [STEPS-1:0] state,
  output logic             done,
  output logic             halted
);
  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= STEPS'(1);
      done   <= 1'b0;
      halted <= 1'b0;
    end else begin
      done <= 1'b0;
      if (tick && !halted) begin
        if (halt) begin
          halted <= 1'b1;
        end else if (last || state[STEPS-1]) begin
          state <= STEPS'(1);
          done  <= 1'b1;
        end else begin
          state <= state << 1;
        end
      end
    end
  end

  // the chain must always hold exactly one active state
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(state));
endmodule
