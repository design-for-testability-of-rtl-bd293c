// ex_act_fn -- activation function of the two-state example FSM.
//
// The chosen idle condition is the self-loop of state 1 taken while
// IN1 = 0. The function looks at the same signals the FSM logic will see
// one clock later: the unregistered input in1 and the next state ns (the
// value about to be written into the state flip-flop):
//     fa = ~in1 & ns
// fa = 1 means that the next clock edge would load in1 = 0 and state 1,
// after which the machine would stay in state 1 with output 1, so the edge
// can be suppressed. The self-loop of state 0 is deliberately not gated.
// Purely combinational.
module ex_act_fn (
  input  logic in1,
  input  logic ns,
  output logic fa
);

  always_comb fa = ~in1 & ns;

endmodule
