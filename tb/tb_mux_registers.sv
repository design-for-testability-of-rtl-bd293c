// tb_mux_registers -- self-checking testbench for mux_registers.
//
// Drives random d and fa and checks, after every rising edge, that the
// bank loaded d when fa was 0 and kept its value when fa was 1. It also
// counts hold cycles and load cycles and requires both to occur.
module tb_mux_registers;

  localparam int unsigned W = 3;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         fa = 1'b0;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic [W-1:0] exp_q = '0;

  int checks = 0;
  int failures = 0;
  int holds = 0, loads = 0;

  mux_registers #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .fa(fa), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s q=%b exp=%b", $time, what, q, exp_q);
    end
  endtask

  initial begin
    #1;
    rst_n = 1'b0;   // falling edge starts the asynchronous reset
    #11;
    check(q == '0, "reset value");
    rst_n = 1'b1;
    repeat (300) begin
      @(negedge clk);
      d  = W'($urandom);
      fa = 1'($urandom);
      @(posedge clk);
      if (fa) holds++;
      else begin
        loads++;
        exp_q = d;
      end
      #1;
      check(q == exp_q, "hold/load");
    end
    check(holds > 0 && loads > 0, "both hold and load occurred");
    $display("holds=%0d loads=%0d", holds, loads);
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
