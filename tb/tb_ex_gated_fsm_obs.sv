// tb_ex_gated_fsm_obs -- self-checking testbench for ex_gated_fsm_obs.
//
// A reference model of the ungated two-state machine (state 0 -> 1 on
// input 11, state 1 -> 0 on in1 = 1, otherwise stay; output = state) runs
// next to the gated-clock machine on random inputs. After every rising
// edge the testbench checks the output against the model and the
// observation output ob against the activation condition (in1 = 0 while
// the output is 1). It counts the edges that reach the registers and
// requires them to equal the edges not suppressed, and requires at least
// one suppressed and one delivered edge.
module tb_ex_gated_fsm_obs;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in1 = 1'b0, in2 = 1'b0;
  logic out, ob, gclk;
  logic m = 1'b0;          // reference state
  logic exp_fa;

  int checks = 0;
  int failures = 0;
  int cycles = 0, gated = 0, delivered = 0;

  ex_gated_fsm_obs dut (.clk(clk), .rst_n(rst_n), .in1(in1), .in2(in2), .out(out), .ob(ob),
                        .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) if (rst_n) delivered++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s out=%b m=%b ob=%b", $time, what, out, m, ob);
    end
  endtask

  task automatic step(input logic i1, input logic i2);
    @(negedge clk);
    in1 = i1;
    in2 = i2;
    @(posedge clk);
    exp_fa = !i1 && m;
    if (exp_fa) gated++;
    m = m ? !i1 : (i1 && i2);
    cycles++;
    #1;
    check(out == m, "output follows the ungated machine");
    check(ob == exp_fa, "ob shows the activation function");
  endtask

  initial begin
    #1;
    rst_n = 1'b0;   // falling edge starts the asynchronous reset
    #15;
    check(out == 1'b0, "reset state 0");
    rst_n = 1'b1;
    // Directed: enter state 1, idle there, leave.
    step(1'b1, 1'b1);
    step(1'b0, 1'b1);
    step(1'b0, 1'b0);
    step(1'b1, 1'b0);
    step(1'b0, 1'b0);
    // Random, biased towards in1 = 0 to spend time in the gated self-loop.
    repeat (500) step(1'($urandom_range(0, 2) == 0), 1'($urandom));
    #1;
    check(delivered == cycles - gated, "delivered edges = cycles - gated");
    check(gated > 0 && delivered > 0, "edges were both gated and delivered");
    $display("cycles=%0d gated=%0d delivered=%0d", cycles, gated, delivered);
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
