// Self-checking testbench of output_driver.
//
// Two drivers are driven with the same complementary bit: one whose n- input
// arrives 0.3 ns late and one with the default skew (one inverter delay).
// After every input change the testbench checks, once things have settled,
// that each gate is the inverse of its input (three inversions per line),
// that gate_l switched exactly STAGE1+STAGE2+STAGE3 = 0.35 ns after p+, and
// that the two gates switched no more than XC2_NS = 0.03 ns apart although
// the inputs were 0.1 or 0.3 ns apart, which only the weak cross-coupled
// paths pulling the late nodes over can achieve.
`timescale 1ns / 1ps
module tb_output_driver;

  localparam real CHAIN_NS = 0.35;
  localparam real XC2 = 0.03;
  localparam real EPS = 0.0015;

  logic p_in = 1'b0;
  logic gl_a, gr_a, gl_b, gr_b;

  int checks = 0;
  int failures = 0;

  output_driver #(.N_SKEW_NS(0.3)) dut_a (
    .p_plus(p_in), .n_minus(~p_in), .gate_l(gl_a), .gate_r(gr_a)
  );
  output_driver dut_b (
    .p_plus(p_in), .n_minus(~p_in), .gate_l(gl_b), .gate_r(gr_b)
  );

  realtime t_in, tl_a, tr_a, tl_b, tr_b;
  always @(posedge gl_a or negedge gl_a) tl_a = $realtime;
  always @(posedge gr_a or negedge gr_a) tr_a = $realtime;
  always @(posedge gl_b or negedge gl_b) tl_b = $realtime;
  always @(posedge gr_b or negedge gr_b) tr_b = $realtime;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #5;
    for (int i = 0; i < 200; i++) begin
      p_in = ~p_in;
      t_in = $realtime;
      #(2.0 + real'($urandom_range(20)));
      expect_true(gl_a == ~p_in && gr_a == p_in, "skewed driver gate levels");
      expect_true(gl_b == ~p_in && gr_b == p_in, "default driver gate levels");
      expect_true(absr(tl_a - t_in - CHAIN_NS) < EPS, "gate_l delay");
      expect_true(absr(tl_b - t_in - CHAIN_NS) < EPS, "gate_l delay (default)");
      expect_true(absr(tl_a - tr_a) <= XC2 + EPS, "gate skew with 0.3 ns input skew");
      expect_true(absr(tl_b - tr_b) <= XC2 + EPS, "gate skew with default input skew");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
