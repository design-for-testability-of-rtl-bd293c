// tb_gated_fsm_core -- self-checking testbench for gated_fsm_core.
//
// The fa, in and ns inputs are driven with independent random values (no
// FSM logic around the core). After every rising edge of the global clock
// the testbench checks that {state, reg_in} loaded {ns, in} exactly when
// fa was 0 or ct was 1, and held otherwise; during the clock-high phase it
// checks ob against fa. A second instance with HAS_CT = 0 must ignore ct.
// Gated, forced (fa = 1 with ct = 1) and normal edges are all counted and
// each must occur.
module tb_gated_fsm_core;

  localparam int unsigned N_IN = 2;
  localparam int unsigned N_ST = 1;

  logic            clk = 1'b0;
  logic            rst_n = 1'b1;
  logic            ct = 1'b0;
  logic            fa = 1'b0;
  logic [N_IN-1:0] in = '0;
  logic [N_ST-1:0] ns = '0;

  logic [N_IN-1:0] reg_in_a, reg_in_b;
  logic [N_ST-1:0] state_a, state_b;
  logic            ob_a, ob_b, gclk_a, gclk_b;
  logic [N_IN+N_ST-1:0] exp_a = '0, exp_b = '0;

  int checks = 0;
  int failures = 0;
  int n_gated = 0, n_forced = 0, n_normal = 0;

  gated_fsm_core #(.N_IN(N_IN), .N_ST(N_ST), .HAS_CT(1'b1)) dut_a (
    .clk(clk), .rst_n(rst_n), .ct(ct), .fa(fa), .in(in), .ns(ns),
    .reg_in(reg_in_a), .state(state_a), .ob(ob_a), .gclk(gclk_a));

  gated_fsm_core #(.N_IN(N_IN), .N_ST(N_ST), .HAS_CT(1'b0)) dut_b (
    .clk(clk), .rst_n(rst_n), .ct(ct), .fa(fa), .in(in), .ns(ns),
    .reg_in(reg_in_b), .state(state_b), .ob(ob_b), .gclk(gclk_b));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #1;
    rst_n = 1'b0;   // falling edge starts the asynchronous reset
    #11;
    check({state_a, reg_in_a} == '0 && {state_b, reg_in_b} == '0, "reset value");
    rst_n = 1'b1;
    repeat (400) begin
      @(negedge clk);
      fa = 1'($urandom);
      ct = 1'($urandom_range(0, 3) == 0);
      in = N_IN'($urandom);
      ns = N_ST'($urandom);
      @(posedge clk);
      if (!fa)     n_normal++;
      else if (ct) n_forced++;
      else         n_gated++;
      if (!fa || ct) exp_a = {ns, in};
      if (!fa)       exp_b = {ns, in};
      #1;
      check({state_a, reg_in_a} == exp_a, "load/hold with CT");
      check({state_b, reg_in_b} == exp_b, "load/hold without CT");
      check(ob_a == fa && ob_b == fa, "ob is latched fa");
    end
    check(n_gated > 0 && n_forced > 0 && n_normal > 0, "gated, forced and normal edges occurred");
    $display("normal=%0d gated=%0d forced=%0d", n_normal, n_gated, n_forced);
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
