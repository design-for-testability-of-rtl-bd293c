// tb_fsm_registers -- self-checking testbench for fsm_registers.
//
// Loads random words on rising edges and checks that q shows the word
// after the edge and holds it in between, and that an asynchronous reset
// in the middle of a clock phase clears the bank at once.
module tb_fsm_registers;

  localparam int unsigned W = 3;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic [W-1:0] exp_q;

  int checks = 0;
  int failures = 0;

  fsm_registers #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

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
    exp_q = '0;
    check(q == exp_q, "reset value");
    rst_n = 1'b1;
    repeat (100) begin
      @(negedge clk);
      d = W'($urandom);
      #2;
      check(q == exp_q, "no load before the edge");
      exp_q = d;
      @(posedge clk);
      #1;
      check(q == exp_q, "load");
      d = ~d;
      #2;
      check(q == exp_q, "hold while clk high");
    end
    // Asynchronous reset while clk is low.
    @(negedge clk);
    d = '1;
    @(posedge clk);
    #1;
    exp_q = '1;
    check(q == exp_q, "load ones");
    @(negedge clk);
    #1;
    rst_n = 1'b0;
    #1;
    exp_q = '0;
    check(q == exp_q, "asynchronous reset");
    @(posedge clk);
    #1;
    check(q == exp_q, "held in reset");
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
