// ex_fsm_logic_opt -- example FSM logic after redundancy removal.
//
// In the gated-clock machine the clock is stopped whenever the register
// inputs would be in1 = 0 with state 1, so the AND gate producing wire A
// (~in1 & s) never sees its only activating input and A stuck-at-0 is
// untestable. Redundancy removal ties A to 0, which removes that AND gate
// and the OR, leaving a single three-input AND:
//     out = in1 & in2 & ~s
// This logic is only correct inside the gated-clock machine (or its
// multiplexed model): it relies on the input/state pair in1 = 0, s = 1
// never being loaded into the registers. Purely combinational.
module ex_fsm_logic_opt (
  input  logic in1,
  input  logic in2,
  input  logic s,
  output logic out
);

  always_comb out = in1 & in2 & ~s;

endmodule
