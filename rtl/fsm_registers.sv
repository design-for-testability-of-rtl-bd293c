// fsm_registers -- register bank of a gated-clock FSM.
//
// W rising-edge D flip-flops that sample the FSM's primary inputs and its
// next state. In the gated-clock FSMs clk is the gated clock, so the bank
// simply misses the edges that the clock gate suppresses. rst_n is an
// asynchronous active-low reset to all zeros; it is asynchronous so that
// reset works even while the clock is being held off by the gate.
//
// A reset state for every flip-flop follows the test-generation setting
// the method assumes; the asynchronous style and the all-zero value are
// this design's choice.
module fsm_registers #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
