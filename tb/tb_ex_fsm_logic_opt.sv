// tb_ex_fsm_logic_opt -- exhaustive self-checking testbench for
// ex_fsm_logic_opt.
//
// For the six register values that the gated-clock machine can hold
// (everything except in1 = 0 with s = 1) the output must equal the next
// state of the two-state machine. For the two excluded values the
// optimized network gives 0 (wire A has been replaced by constant 0).
module tb_ex_fsm_logic_opt;

  logic in1, in2, s, out;
  logic exp_out;
  int checks = 0;
  int failures = 0;

  ex_fsm_logic_opt dut (.in1(in1), .in2(in2), .s(s), .out(out));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, in2, in1} = 3'(v);
      #1;
      if (!in1 && s) exp_out = 1'b0;                  // unreachable pair
      else           exp_out = s ? !in1 : (in1 && in2);
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL in1=%b in2=%b s=%b got %b", in1, in2, s, out);
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
