// Sequencer of the microcoded vending machine.
//
// Instead of storing a next state for every state/input pair, the ROM holds
// one branch bit `b` per state. When b is 0 the machine returns to state 0
// (S_RDY). When b is 1 the coin inputs choose how far to step: +1 for 10c,
// +2 for 20c, +0 (stay) with no coin. If both coins are seen in one cycle the
// 10c step wins, as in the lecture's next-state equation. Purely
// combinational; S is the state width (3 for the six-state machine).
module vend_sequencer #(
  parameter int S = 3
) (
  input  logic [S-1:0] state,
  input  logic         b,
  input  logic         ten,
  input  logic         twenty,
  output logic [S-1:0] next_state
);

  logic [S-1:0] step;

  always_comb begin
    // The small multiplexer of constants 0, 1, 2 feeding the adder.
    if (ten)         step = S'(1);
    else if (twenty) step = S'(2);
    else             step = '0;
    // The 2:1 multiplexer controlled by the branch bit.
    next_state = b ? state + step : '0;
  end

endmodule
