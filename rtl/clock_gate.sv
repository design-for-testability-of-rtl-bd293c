// clock_gate -- latch-based clock gate for a gated-clock FSM, with the
// test controllability input CT and the observation output OB.
//
// The activation function fa (1 while the FSM sits in a self-loop chosen
// for gating) is captured by a level-sensitive latch L that is transparent
// while the global clock is low. While the clock is high the latch holds,
// so glitches on fa after a rising edge cannot reach the gated clock. The
// gated clock is
//     gclk = clk & ~(L & ~ct)          (HAS_CT = 1)
//     gclk = clk & ~L                  (HAS_CT = 0)
// so a rising clock edge reaches the registers only when fa was 0 just
// before it, or when ct = 1. ob carries the latched activation function so
// that a stuck-at-0 on it can be observed.
//
// Timing: fa must be settled before the rising edge of clk (same budget as
// a register D input). ct is a quasi-static test-mode pin and must not
// change while clk is high. gclk follows clk combinationally.
//
// The latch, its polarity and the AND gating follow the gated-clock model
// this design is built on; the controllability input and the observation
// point are the two test features. Tapping OB at the latch output (rather
// than after the CT gate) is this design's choice: it keeps fa observable
// in both functional and test mode.
//
// The latch is intentional (it is the gating latch L); lint tools report
// it as a latch.
module clock_gate #(
  parameter bit HAS_CT = 1'b1   // 1: CT input honoured, 0: observability only
) (
  input  logic clk,
  input  logic fa,
  input  logic ct,
  output logic gclk,
  output logic ob
);

  logic fa_l;      // latch L output
  logic stop;      // 1 = suppress the next clock pulse

  // Latch L: transparent while the global clock is low.
  always_latch begin
    if (!clk) fa_l = fa;
  end

  if (HAS_CT) begin : g_ct
    assign stop = fa_l & ~ct;
  end else begin : g_no_ct
    assign stop = fa_l;
  end

  assign gclk = clk & ~stop;
  assign ob   = fa_l;

endmodule
