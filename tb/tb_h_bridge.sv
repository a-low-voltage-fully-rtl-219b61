// Self-checking testbench of h_bridge.
//
// Drives the two gates through all four combinations in random order and
// checks that each output is the inverse of its gate, that it changes
// OUT_NS = 0.5 ns after the gate, and that crossover is high exactly when both
// outputs are at the same level (both halves pulling the load the same way).
`timescale 1ns / 1ps
module tb_h_bridge;

  localparam real OUT_NS = 0.5;
  localparam real EPS = 0.0015;

  logic gl = 1'b0, gr = 1'b1;
  logic ol, orr, xo;
  int checks = 0;
  int failures = 0;
  realtime t_g, t_o;
  int n_cross = 0;

  h_bridge dut (.gate_l(gl), .gate_r(gr), .out_l(ol), .out_r(orr), .crossover(xo));

  always @(posedge ol or negedge ol) t_o = $realtime;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  initial begin
    #5;
    for (int i = 0; i < 300; i++) begin
      logic nl, nr;
      nl = 1'($urandom_range(1));
      nr = 1'($urandom_range(1));
      t_g = $realtime;
      if (nl != gl) begin
        gl = nl;
        #(OUT_NS - 0.01);
        expect_true(ol == gl, "out_l still old just before OUT_NS");
        #0.02;
        expect_true(t_o - t_g > OUT_NS - EPS && t_o - t_g < OUT_NS + EPS, "out_l delay");
      end
      gr = nr;
      #2;
      expect_true(ol == ~gl && orr == ~gr, "outputs invert the gates");
      expect_true(xo == (gl == gr), "crossover flag");
      n_cross += int'(xo);
    end
    expect_true(n_cross > 0, "crossover seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
