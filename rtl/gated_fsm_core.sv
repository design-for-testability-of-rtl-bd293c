// gated_fsm_core -- clocking and state-holding shell of a testable
// gated-clock FSM.
//
// A gated-clock FSM consists of its combinational logic, a register bank
// that samples the primary inputs together with the next state, and an
// activation function fa that detects self-loops, where neither state nor
// output would change. This shell holds everything except the two pieces
// of combinational logic, which the wrapper builds around it:
//   * fa (computed by the wrapper from the unregistered inputs `in` and the
//     next state `ns`) goes through the latch-based clock_gate;
//   * the register bank {ns, in} is clocked by the gated clock;
//   * reg_in / state feed the wrapper's combinational logic.
// With HAS_CT = 1 the test pin ct = 1 keeps the clock running whatever fa
// says, so the logic sees every input/state combination of the ungated
// machine; ob brings the latched fa out as an observation point.
//
// Timing: in, ns and fa must be settled before the rising edge of clk.
// reg_in and state change right after a rising edge that was not gated.
// rst_n resets the bank asynchronously to zero (state 0).
//
// The structure (fa -> latch -> AND gate -> register clock, CT and OB) is
// that of the testable gated-clock FSM; the packing {state, inputs} and
// the asynchronous reset are this design's choices. gclk is brought out
// only so that users can count delivered clock edges.
module gated_fsm_core #(
  parameter int unsigned N_IN   = 2,
  parameter int unsigned N_ST   = 1,
  parameter bit          HAS_CT = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ct,
  input  logic            fa,
  input  logic [N_IN-1:0] in,
  input  logic [N_ST-1:0] ns,
  output logic [N_IN-1:0] reg_in,
  output logic [N_ST-1:0] state,
  output logic            ob,
  output logic            gclk
);

  logic [N_IN+N_ST-1:0] q;

  clock_gate #(.HAS_CT(HAS_CT)) u_cg (
    .clk  (clk),
    .fa   (fa),
    .ct   (ct),
    .gclk (gclk),
    .ob   (ob)
  );

  fsm_registers #(.W(N_IN+N_ST)) u_regs (
    .clk   (gclk),
    .rst_n (rst_n),
    .d     ({ns, in}),
    .q     (q)
  );

  assign reg_in = q[N_IN-1:0];
  assign state  = q[N_IN+N_ST-1:N_IN];

endmodule
