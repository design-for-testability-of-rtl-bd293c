// tb_ex_mux_model -- self-checking testbench for ex_mux_model.
//
// Runs the single-clock multiplexed model on random inputs next to a
// reference model of the ungated two-state machine. Before every edge it
// checks that ob (the unlatched activation function) is 1 exactly when
// in1 = 0 and the output is 1; after the edge it checks the output and
// that the output stayed unchanged when ob was 1. Hold cycles must
// occur.
module tb_ex_mux_model;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in1 = 1'b0, in2 = 1'b0;
  logic out, ob;
  logic m = 1'b0;

  int checks = 0;
  int failures = 0;
  int holds = 0;

  ex_mux_model dut (.clk(clk), .rst_n(rst_n), .in1(in1), .in2(in2), .out(out), .ob(ob));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s out=%b m=%b ob=%b", $time, what, out, m, ob);
    end
  endtask

  task automatic step(input logic i1, input logic i2);
    logic fa_now, m_old;
    @(negedge clk);
    in1 = i1;
    in2 = i2;
    #1;
    fa_now = !i1 && m;
    check(ob == fa_now, "ob is the activation function");
    @(posedge clk);
    m_old = m;
    m = m ? !i1 : (i1 && i2);
    #1;
    check(out == m, "output follows the ungated machine");
    if (fa_now) begin
      holds++;
      check(out == m_old, "output unchanged in a held cycle");
    end
  endtask

  initial begin
    #1;
    rst_n = 1'b0;   // falling edge starts the asynchronous reset
    #15;
    check(out == 1'b0, "reset state 0");
    rst_n = 1'b1;
    repeat (500) step(1'($urandom_range(0, 2) == 0), 1'($urandom));
    check(holds > 0, "hold cycles occurred");
    $display("holds=%0d", holds);
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
