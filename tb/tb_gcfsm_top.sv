// tb_gcfsm_top -- end-to-end self-checking testbench for gcfsm_top.
//
// Drives the three implementations of the example machine with the same
// inputs and checks each output against a reference model of the ungated
// two-state machine, and the three observation outputs against the
// activation condition (in1 = 0 while the output is 1). The run covers,
// and counts, every mechanism of the design:
//   gated    - an edge suppressed by the activation function (both gated
//              versions), seen as a missing edge on their register clocks;
//   held     - the multiplexed model holding its registers (fa = 1);
//   ob       - the observation outputs at 1;
//   forced   - an edge delivered with fa = 1 because ct = 1;
//   wire_a   - wire A of the controllability version activated, which is
//              possible only under ct = 1 (sequence 11, 01 from reset);
//   reset    - an asynchronous reset in the middle of operation.
// A mechanism that never happened counts as a failure.
module tb_gcfsm_top;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic ct = 1'b0;
  logic in1 = 1'b0, in2 = 1'b0;
  logic out_obs, ob_obs, out_ctob, ob_ctob, a_ctob, out_mux, ob_mux, gclk_obs, gclk_ctob;
  logic m = 1'b0;
  logic exp_fa;
  logic ct_mode = 1'b0;    // ct value applied at the next falling edge

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int n_gated_obs = 0, n_gated_ctob = 0;       // expected suppressed edges
  int edges_obs = 0, edges_ctob = 0;           // edges seen on gated clocks
  int n_held = 0, n_ob = 0, n_forced = 0, n_wire_a = 0, n_reset = 0;

  gcfsm_top dut (
    .clk(clk), .rst_n(rst_n), .ct(ct), .in1(in1), .in2(in2),
    .out_obs(out_obs), .ob_obs(ob_obs), .out_ctob(out_ctob), .ob_ctob(ob_ctob),
    .a_ctob(a_ctob), .out_mux(out_mux), .ob_mux(ob_mux),
    .gclk_obs(gclk_obs), .gclk_ctob(gclk_ctob));

  always #5 clk = ~clk;
  always @(posedge gclk_obs)  if (rst_n) edges_obs++;
  always @(posedge gclk_ctob) if (rst_n) edges_ctob++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s m=%b out=%b/%b/%b ob=%b/%b/%b", $time, what, m,
               out_obs, out_ctob, out_mux, ob_obs, ob_ctob, ob_mux);
    end
  endtask

  task automatic step(input logic i1, input logic i2);
    @(negedge clk);
    ct  = ct_mode;
    in1 = i1;
    in2 = i2;
    #1;
    exp_fa = !i1 && m;
    check(ob_mux == exp_fa, "multiplexed model fa");
    @(posedge clk);
    cycles++;
    if (exp_fa) begin
      n_gated_obs++;
      n_held++;
      if (ct) n_forced++;
      else    n_gated_ctob++;
    end
    m = m ? !i1 : (i1 && i2);
    #1;
    check(out_obs == m,  "observability version output");
    check(out_ctob == m, "controllability version output");
    check(out_mux == m,  "multiplexed model output");
    check(ob_obs == exp_fa && ob_ctob == exp_fa, "latched observation outputs");
    if (ob_obs) n_ob++;
    if (a_ctob) n_wire_a++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    #2;
    rst_n = 1'b0;
    #1;
    m = 1'b0;
    n_reset++;
    check(out_obs == 1'b0 && out_ctob == 1'b0 && out_mux == 1'b0, "asynchronous reset");
    @(posedge clk);    // held in reset across this edge
    #1;
    rst_n = 1'b1;
  endtask

  initial begin
    #1;
    rst_n = 1'b0;   // falling edge starts the asynchronous reset
    #15;
    rst_n = 1'b1;
    // Normal operation.
    repeat (300) step(1'($urandom_range(0, 2) == 0), 1'($urandom));
    check(n_wire_a == 0, "wire A unreachable with gating on");
    // Test mode: the sequence that activates wire A, then random.
    do_reset();
    ct_mode = 1'b1;
    step(1'b1, 1'b1);
    step(1'b0, 1'b1);
    check(a_ctob == 1'b1, "sequence 11, 01 activates wire A under CT");
    repeat (200) step(1'($urandom_range(0, 2) == 0), 1'($urandom));
    // Back to normal operation.
    ct_mode = 1'b0;
    repeat (200) step(1'($urandom_range(0, 2) == 0), 1'($urandom));
    #1;
    check(edges_obs  == cycles - n_gated_obs,  "observability version edge count");
    check(edges_ctob == cycles - n_gated_ctob, "controllability version edge count");
    check(n_gated_obs  > 0, "mechanism: clock gated (observability version)");
    check(n_gated_ctob > 0, "mechanism: clock gated (controllability version)");
    check(n_held   > 0, "mechanism: multiplexed model hold");
    check(n_ob     > 0, "mechanism: observation output high");
    check(n_forced > 0, "mechanism: CT forced clock");
    check(n_wire_a > 0, "mechanism: wire A activated");
    check(n_reset  > 0, "mechanism: reset");
    $display("cycles=%0d gated_obs=%0d gated_ctob=%0d held=%0d ob=%0d forced=%0d wire_a=%0d reset=%0d",
             cycles, n_gated_obs, n_gated_ctob, n_held, n_ob, n_forced, n_wire_a, n_reset);
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
