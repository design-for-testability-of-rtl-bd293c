// ex_gated_fsm_obs -- the example FSM as a fully testable gated-clock
// machine with increased observability (first technique).
//
// Structure: the activation function fa = ~IN1 & OUT feeds the latch-based
// clock gate, whose latched value is also brought out as the observation
// output ob. The registers {state, in2, in1} run on the gated clock and
// feed the redundancy-free logic out = in1 & in2 & ~s. There is no CT pin:
// the clock is always gated by fa.
//
// Interface: in1/in2 are sampled on rising edges of clk that are not
// suppressed; out is the Moore output (= state) and changes after such an
// edge. rst_n (asynchronous, active low) puts the machine in state 0.
// ob is high during the clock-high phase that follows a suppressed edge
// (it is the latch L output). gclk is the gated clock of the register
// bank, brought out only so that suppressed edges can be counted.
//
// Input/output behaviour is that of the ungated two-state machine. The
// optimized logic and the observation point follow the method; the reset
// style is this design's own.
module ex_gated_fsm_obs
  import gcfsm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in1,
  input  logic in2,
  output logic out,
  output logic ob,
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

  gated_fsm_core #(.N_IN(EX_N_IN), .N_ST(EX_N_ST), .HAS_CT(1'b0)) u_core (
    .clk    (clk),
    .rst_n  (rst_n),
    .ct     (1'b0),
    .fa     (fa),
    .in     ({in2, in1}),
    .ns     (out),
    .reg_in (reg_in),
    .state  (state),
    .ob     (ob),
    .gclk   (gclk)
  );

  ex_fsm_logic_opt u_logic (
    .in1 (reg_in[EX_IN1]),
    .in2 (reg_in[EX_IN2]),
    .s   (state[0]),
    .out (out)
  );

endmodule
