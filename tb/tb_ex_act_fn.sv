// tb_ex_act_fn -- exhaustive self-checking testbench for ex_act_fn.
//
// The activation function must be 1 exactly when the machine is about to
// take the self-loop of state 1 (next state 1, in1 = 0), and 0 otherwise,
// including the self-loop of state 0, which is not gated.
module tb_ex_act_fn;

  logic in1, ns, fa;
  int checks = 0;
  int failures = 0;

  ex_act_fn dut (.in1(in1), .ns(ns), .fa(fa));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {ns, in1} = 2'(v);
      #1;
      checks++;
      if (fa !== (ns && !in1)) begin
        failures++;
        $display("FAIL in1=%b ns=%b fa=%b", in1, ns, fa);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
