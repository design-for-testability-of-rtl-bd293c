// tb_ex_gated_fsm_ctob -- self-checking testbench for ex_gated_fsm_ctob.
//
// Part 1 (ct = 0, normal operation): random inputs, output checked against
// a reference model of the ungated two-state machine, ob checked against
// the activation condition, suppressed edges counted. Wire A must stay 0
// throughout, because the register value in1 = 0, s = 1 that activates it
// is never loaded while gating is on.
// Part 2 (ct = 1, test mode): from reset, the input sequence (11, 01)
// must load in1 = 0, s = 1 and raise wire A, and no edge may be
// suppressed. The output must still follow the model.
// Part 3: the same sequence with ct = 0 must not raise A.
module tb_ex_gated_fsm_ctob;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic ct = 1'b0;
  logic in1 = 1'b0, in2 = 1'b0;
  logic out, ob, a, gclk;
  logic m = 1'b0;
  logic exp_fa;

  int checks = 0;
  int failures = 0;
  int cycles = 0, gated = 0, forced = 0, delivered = 0, a_seen = 0;

  ex_gated_fsm_ctob dut (.clk(clk), .rst_n(rst_n), .ct(ct), .in1(in1), .in2(in2),
                         .out(out), .ob(ob), .a(a), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) if (rst_n) delivered++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s out=%b m=%b ob=%b a=%b", $time, what, out, m, ob, a);
    end
  endtask

  task automatic step(input logic i1, input logic i2);
    @(negedge clk);
    in1 = i1;
    in2 = i2;
    @(posedge clk);
    exp_fa = !i1 && m;
    if (exp_fa && !ct) gated++;
    if (exp_fa && ct)  forced++;
    m = m ? !i1 : (i1 && i2);
    cycles++;
    #1;
    check(out == m, "output follows the ungated machine");
    check(ob == exp_fa, "ob shows the activation function");
    if (a) a_seen++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    m = 1'b0;
    check(out == 1'b0, "reset state 0");
    @(posedge clk);    // held in reset across this edge
    #1;
    rst_n = 1'b1;
  endtask

  initial begin
    #1;
    rst_n = 1'b0;   // falling edge starts the asynchronous reset
    #15;
    rst_n = 1'b1;
    // Part 1.
    ct = 1'b0;
    repeat (400) step(1'($urandom_range(0, 2) == 0), 1'($urandom));
    check(a_seen == 0, "wire A never active with gating on");
    check(gated > 0, "edges were suppressed");
    check(delivered == cycles - gated, "delivered edges = cycles - gated");
    // Part 2: test mode, sequence (11, 01) from reset.
    do_reset();
    ct = 1'b1;
    a_seen = 0;
    step(1'b1, 1'b1);
    check(out == 1'b1, "11 moves to state 1");
    step(1'b0, 1'b1);
    check(a == 1'b1, "01 in state 1 activates wire A under CT");
    check(forced == 1, "edge with fa = 1 delivered under CT");
    repeat (200) step(1'($urandom_range(0, 2) == 0), 1'($urandom));
    // Part 3: same sequence with gating on.
    do_reset();
    ct = 1'b0;
    a_seen = 0;
    step(1'b1, 1'b1);
    step(1'b0, 1'b1);
    check(a == 1'b0 && a_seen == 0, "wire A stays 0 with gating on");
    #1;
    check(delivered == cycles - gated, "delivered edges = cycles - gated (all parts)");
    $display("cycles=%0d gated=%0d forced=%0d delivered=%0d", cycles, gated, forced, delivered);
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
