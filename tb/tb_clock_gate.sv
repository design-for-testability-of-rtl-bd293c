// tb_clock_gate -- self-checking testbench for clock_gate.
//
// Two instances are driven side by side: one with the CT input (HAS_CT=1)
// and one without (HAS_CT=0). The testbench keeps its own copy of the
// latch value (fa sampled at the end of every clock-low phase) and checks,
// in the middle of every clock-high phase, that each gated clock is high
// exactly when the latched fa is 0 (or ct is 1), that ob equals the
// latched fa, and that toggling fa while the clock is high does not
// disturb the gated clock. It also counts delivered gated-clock edges and
// compares them with the expected number.
module tb_clock_gate;

  logic clk = 1'b0;
  logic fa  = 1'b0;
  logic ct  = 1'b0;
  logic gclk_ct, ob_ct, gclk_nct, ob_nct;

  int checks = 0;
  int failures = 0;
  int exp_edges_ct = 0, exp_edges_nct = 0;
  int got_edges_ct = 0, got_edges_nct = 0;
  logic fa_l_ref;

  clock_gate #(.HAS_CT(1'b1)) dut_ct  (.clk(clk), .fa(fa), .ct(ct),   .gclk(gclk_ct),  .ob(ob_ct));
  clock_gate #(.HAS_CT(1'b0)) dut_nct (.clk(clk), .fa(fa), .ct(1'b1), .gclk(gclk_nct), .ob(ob_nct));

  always @(posedge gclk_ct)  got_edges_ct++;
  always @(posedge gclk_nct) got_edges_nct++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // One clock period of 10 time units: low phase first.
  task automatic cycle(input logic fa_v, input logic ct_v, input logic glitch);
    clk = 1'b0;
    fa  = fa_v;
    ct  = ct_v;
    #4;
    fa_l_ref = fa_v;             // value the latch closes on
    #1;
    clk = 1'b1;
    #1;
    if (glitch) fa = ~fa;        // disturb fa while the latch is closed
    #1;
    check(gclk_ct  == ~(fa_l_ref & ~ct_v), "gclk with CT");
    check(gclk_nct == ~fa_l_ref,           "gclk without CT");
    check(ob_ct  == fa_l_ref, "ob with CT");
    check(ob_nct == fa_l_ref, "ob without CT");
    if (!(fa_l_ref & ~ct_v)) exp_edges_ct++;
    if (!fa_l_ref)           exp_edges_nct++;
    #3;
  endtask

  initial begin
    // Directed corners.
    cycle(1'b0, 1'b0, 1'b0);
    cycle(1'b1, 1'b0, 1'b0);
    cycle(1'b1, 1'b1, 1'b0);
    cycle(1'b0, 1'b1, 1'b0);
    cycle(1'b1, 1'b0, 1'b1);
    cycle(1'b0, 1'b0, 1'b1);
    // Random traffic.
    repeat (200) cycle(1'($urandom), 1'($urandom_range(0, 3) == 0), 1'($urandom));
    clk = 1'b0;
    #5;
    check(got_edges_ct  == exp_edges_ct,  "edge count with CT");
    check(got_edges_nct == exp_edges_nct, "edge count without CT");
    // Clock low: the gated clock must be low too.
    check(gclk_ct == 1'b0 && gclk_nct == 1'b0, "gclk low while clk low");
    $display("edges delivered: with CT %0d, without CT %0d", got_edges_ct, got_edges_nct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
