// gcfsm_top -- the two testable gated-clock versions of the example FSM and
// its multiplexed test model, side by side.
//
// All three instances receive the same clock, reset and inputs:
//   * u_obs  : increased observability, redundancy-free logic (out_obs,
//              ob_obs);
//   * u_ctob : increased controllability and observability, original
//              logic (out_ctob, ob_ctob), with test pin ct;
//   * u_mux  : single-clock multiplexed model used for test generation
//              (out_mux, ob_mux = fa).
// With ct = 0 all three are functionally the ungated two-state machine,
// so out_obs, out_ctob and out_mux are always equal; with ct = 1 only the
// clock gating of u_ctob is disabled, which leaves its outputs unchanged
// as well. An assertion checks this equivalence on every falling edge,
// after the outputs have settled. `a_ctob` exposes wire A of u_ctob;
// gclk_obs / gclk_ctob are the gated register clocks, brought out so
// that suppressed clock edges can be counted.
//
// Putting the variants next to each other is this design's choice, so
// that they can be compared in one simulation.
module gcfsm_top (
  input  logic clk,
  input  logic rst_n,
  input  logic ct,
  input  logic in1,
  input  logic in2,
  output logic out_obs,
  output logic ob_obs,
  output logic out_ctob,
  output logic ob_ctob,
  output logic a_ctob,
  output logic out_mux,
  output logic ob_mux,
  output logic gclk_obs,   // gated register clocks, for monitoring only
  output logic gclk_ctob
);

  ex_gated_fsm_obs u_obs (
    .clk   (clk),
    .rst_n (rst_n),
    .in1   (in1),
    .in2   (in2),
    .out   (out_obs),
    .ob    (ob_obs),
    .gclk  (gclk_obs)
  );

  ex_gated_fsm_ctob u_ctob (
    .clk   (clk),
    .rst_n (rst_n),
    .ct    (ct),
    .in1   (in1),
    .in2   (in2),
    .out   (out_ctob),
    .ob    (ob_ctob),
    .a     (a_ctob),
    .gclk  (gclk_ctob)
  );

  ex_mux_model u_mux (
    .clk   (clk),
    .rst_n (rst_n),
    .in1   (in1),
    .in2   (in2),
    .out   (out_mux),
    .ob    (ob_mux)
  );

  // The three implementations must agree at all times.
  a_equiv : assert property (@(negedge clk) disable iff (!rst_n)
                             (out_obs == out_ctob) && (out_obs == out_mux));

endmodule
