// ex_fsm_logic -- combinational logic of the two-state example FSM.
//
// The machine is a Moore FSM with states 0 and 1 whose output equals its
// state. From state 0 it goes to 1 on input 11 and stays otherwise; from
// state 1 it goes to 0 when IN1 = 1 and stays while IN1 = 0. With the
// inputs registered next to the state bit, the logic is two AND gates and
// an OR:
//     A   = ~in1 &  s          (stay in state 1)
//     B   =  in1 & in2 & ~s    (leave state 0)
//     out = A | B              (next state, also the FSM output)
// Inputs are the registered in1/in2 and the state bit s; `out` is both the
// primary output and the D input of the state flip-flop. Purely
// combinational. `a` is wire A brought out for observation only.
//
// The gate structure is the example's original (unoptimized) network.
module ex_fsm_logic (
  input  logic in1,
  input  logic in2,
  input  logic s,
  output logic a,
  output logic out
);

  logic b;

  always_comb begin
    a   = ~in1 & s;
    b   = in1 & in2 & ~s;
    out = a | b;
  end

endmodule
