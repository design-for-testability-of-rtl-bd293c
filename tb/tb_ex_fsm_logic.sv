// tb_ex_fsm_logic -- exhaustive self-checking testbench for ex_fsm_logic.
//
// For all eight values of (in1, in2, s) the output must be the next state
// of the two-state machine (state 0 -> 1 on input 11, state 1 -> 0 on
// in1 = 1, otherwise stay) and wire A must be high only for in1 = 0, s = 1.
module tb_ex_fsm_logic;

  logic in1, in2, s, a, out;
  logic exp_out, exp_a;
  int checks = 0;
  int failures = 0;

  ex_fsm_logic dut (.in1(in1), .in2(in2), .s(s), .a(a), .out(out));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, in2, in1} = 3'(v);
      #1;
      exp_out = s ? !in1 : (in1 && in2);
      exp_a   = (in1 == 1'b0) && (s == 1'b1);
      checks += 2;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL out in1=%b in2=%b s=%b got %b", in1, in2, s, out);
      end
      if (a !== exp_a) begin
        failures++;
        $display("FAIL a in1=%b in2=%b s=%b got %b", in1, in2, s, a);
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
