// mux_registers -- register bank of the multiplexed model of a gated-clock
// FSM.
//
// Every flip-flop runs on the ungated global clock. A 2:1 multiplexer in
// front of each one selects its own output when fa = 1 (hold) and the
// new value d when fa = 0:
//     q(n+1) = fa ? q(n) : d(n)
// This reproduces, on a single clock, what a clock gate driven by fa does
// to an ordinary register bank, so standard synchronous test-generation
// and redundancy-removal tools can be applied. The multiplexers and the
// feedback wires are model-only; they do not exist in the gated circuit.
//
// fa here is the unlatched activation function: in the model there is no
// latch, fa is simply sampled together with d at the rising edge.
// rst_n is an asynchronous active-low reset to zero (this design's choice,
// matching fsm_registers).
module mux_registers #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fa,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] mux_out;

  // Input "1" of the multiplexer is the flip-flop's own output, input "0"
  // the new value.
  assign mux_out = fa ? q : d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= mux_out;
  end

endmodule
