// ex_mux_model -- multiplexed model of the example gated-clock FSM with
// increased observability.
//
// A single-clock circuit that behaves, cycle for cycle, like the
// gated-clock machine and can therefore be handed to ordinary synchronous
// test-generation and redundancy-removal tools. The clock gate is removed;
// each flip-flop (in1, in2, state) gets a hold multiplexer controlled by
// the activation function fa = ~IN1 & OUT, and fa itself is a primary
// output (the observation point). The combinational logic is the
// original network A = ~in1 & s, B = in1 & in2 & ~s, out = A | B: this is
// the circuit on which redundancy removal finds A stuck-at-0 untestable.
//
// Interface: in1/in2 are sampled on every rising clk edge unless fa = 1;
// out is the Moore output; ob = fa (combinational, not latched).
// rst_n (asynchronous, active low) puts the machine in state 0.
module ex_mux_model
  import gcfsm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in1,
  input  logic in2,
  output logic out,
  output logic ob
);

  logic             fa;
  logic             a_unused;
  logic [EX_W-1:0]  q;

  ex_act_fn u_fa (
    .in1 (in1),
    .ns  (out),
    .fa  (fa)
  );

  mux_registers #(.W(EX_W)) u_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .fa    (fa),
    .d     ({out, in2, in1}),
    .q     (q)
  );

  ex_fsm_logic u_logic (
    .in1 (q[EX_IN1]),
    .in2 (q[EX_IN2]),
    .s   (q[EX_ST]),
    .a   (a_unused),
    .out (out)
  );

  assign ob = fa;

endmodule
