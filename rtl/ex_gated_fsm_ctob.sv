// ex_gated_fsm_ctob -- the example FSM as a gated-clock machine with
// increased controllability and observability (second technique).
//
// The combinational logic is the original, unmodified network
// (A = ~in1 & s, B = in1 & in2 & ~s, out = A | B), so a test set made for
// the ungated machine still applies. The activation function
// fa = ~IN1 & OUT drives the latch-based clock gate. Two test pins are
// added: ct = 1 disables clock gating, so the registers load on every
// edge and the logic sees all input/state combinations (including the
// in1 = 0, s = 1 pair that activates wire A); ob brings out the latched
// fa.
//
// Interface and timing as in ex_gated_fsm_obs (including the monitor
// output gclk),
// plus ct, a quasi-static test-mode input that must not change while clk
// is high. `a` exposes wire A for observation in simulation; it is not a
// test pin. rst_n (asynchronous, active low) puts the machine in state 0.
module ex_gated_fsm_ctob
  import gcfsm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ct,
  input  logic in1,
  input  logic in2,
  output logic out,
  output logic ob,
  output logic a,
  output logic gclk   // gated register clock, for monitoring only
);

  logic             fa;
  logic [EX_N_IN-1:0] reg_in;
  logic [EX_N_ST-1:0] state;

  ex_act_fn u_fa (
    .in1 (in1),
    .ns  (out),
    .fa  (fa)
  );

  gated_fsm_core #(.N_IN(EX_N_IN), .N_ST(EX_N_ST), .HAS_CT(1'b1)) u_core (
    .clk    (clk),
    .rst_n  (rst_n),
    .ct     (ct),
    .fa     (fa),
    .in     ({in2, in1}),
    .ns     (out),
    .reg_in (reg_in),
    .state  (state),
    .ob     (ob),
    .gclk   (gclk)
  );

  ex_fsm_logic u_logic (
    .in1 (reg_in[EX_IN1]),
    .in2 (reg_in[EX_IN2]),
    .s   (state[0]),
    .a   (a),
    .out (out)
  );

endmodule
