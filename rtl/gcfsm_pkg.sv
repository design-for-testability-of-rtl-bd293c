// gcfsm_pkg -- constants shared by the gated-clock FSM example.
//
// The example machine is a two-state Moore FSM whose output equals its
// state. Its implementation registers both primary inputs (IN1, IN2) and
// the one state bit in the same register bank, so the bank is three bits
// wide: {state, in2, in1}. The field positions below are this design's own
// packing choice; the widths follow the example.
package gcfsm_pkg;

  localparam int unsigned EX_N_IN = 2;               // IN1, IN2
  localparam int unsigned EX_N_ST = 1;               // one state bit
  localparam int unsigned EX_W    = EX_N_IN + EX_N_ST;

  // Bit positions inside the example's register bank.
  localparam int unsigned EX_IN1 = 0;
  localparam int unsigned EX_IN2 = 1;
  localparam int unsigned EX_ST  = 2;

endpackage
