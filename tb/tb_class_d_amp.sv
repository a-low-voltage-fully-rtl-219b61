// End-to-end testbench of class_d_amp, at its default parameters.
//
// Plays a half-scale 2.75 kHz tone (the test tone of the published
// measurements) into the amplifier for two full periods, then an overload
// burst at 0.95 of full scale, then a DC level. It checks:
//   * at mid-clock, spk_p equals the bitstream and spk_n its inverse, and the
//     bridge is not in crossover;
//   * spk_p switches 0.85 ns after bitstream (driver chain plus bridge);
//   * audio recovery: spk_p read as +/-1 and passed through a sinc^3 filter
//     (three length-64 moving averages) matches the input, 4 clocks delayed,
//     through the same filter, to 1e-3 of full scale;
//   * every crossover pulse (both bridge halves the same way) is at most
//     0.03 ns wide, although n- enters the driver one inverter delay late;
//   * the tone never clamps the modulator; the overload burst does, and
//     after it no clamp happens and the DC level that follows is
//     reproduced by the pulse density to within 1e-3.
// It counts how often each mechanism happened (bitstream transitions,
// bridge reversals, crossover pulses, crossover pulses shorter than the
// n- input skew, i.e. cross-coupled pull-overs, and clamps) and
// counts a failure for any that never did.
`timescale 1ns / 1ps
module tb_class_d_amp;
  import class_d_pkg::*;

  localparam real TCLK = 177.154;
  localparam int  L = 64;
  localparam real EPS = 0.0015;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [PCM_W-1:0] pcm_in = '0;
  logic bitstream, sat, spk_p, spk_n, crossover;

  int checks = 0;
  int failures = 0;

  class_d_amp dut (
    .clk(clk), .rst_n(rst_n), .pcm_in(pcm_in), .bitstream(bitstream), .sat(sat),
    .spk_p(spk_p), .spk_n(spk_n), .crossover(crossover)
  );

  always #(TCLK / 2) clk = ~clk;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // ---- edge timing and event counters -------------------------------------
  realtime t_bit, t_spk, t_xo;
  real max_lag = 0.0, min_lag = 1.0e9, max_xo = 0.0;
  int n_bit_edges = 0, n_spk_edges = 0, n_xo = 0, n_fixed = 0, n_sat = 0;

  always @(posedge bitstream or negedge bitstream) begin
    t_bit = $realtime;
    if (rst_n) n_bit_edges++;
  end
  always @(posedge spk_p or negedge spk_p) begin
    t_spk = $realtime;
    if (rst_n && n_bit_edges > 0) begin
      n_spk_edges++;
      if (t_spk - t_bit > max_lag) max_lag = t_spk - t_bit;
      if (t_spk - t_bit < min_lag) min_lag = t_spk - t_bit;
    end
  end
  always @(posedge crossover) t_xo = $realtime;
  always @(negedge crossover) begin
    if (rst_n && $realtime > 100.0) begin
      n_xo++;
      if ($realtime - t_xo > max_xo) max_xo = $realtime - t_xo;
      // n- enters the driver N_SKEW = 0.1 ns late; a shorter crossover means
      // the cross-coupled pairs pulled the late line over.
      if ($realtime - t_xo < 0.1 - EPS) n_fixed++;
    end
  end

  // ---- sinc^3 filters ---------------------------------------------------------
  real fy[3][L];
  real fu[3][L];
  real sy[3], su[3];
  real udel[5];

  function automatic real sinc3(ref real buf3[3][L], ref real s[3], input real x, input int idx);
    real v = x;
    for (int k = 0; k < 3; k++) begin
      s[k] = s[k] + v - buf3[k][idx];
      buf3[k][idx] = v;
      v = s[k] / L;
    end
    return v;
  endfunction

  // One clock: check the mid-clock levels, then present the next sample.
  task automatic cycle(int u);
    @(negedge clk);
    expect_true(spk_p == bitstream && spk_n == ~bitstream, "bridge follows bitstream");
    expect_true(!crossover, "no crossover at mid-clock");
    n_sat += int'(sat);
    pcm_in = PCM_W'(u);
  endtask

  initial begin
    real ey, eu, emax, err, mean;
    int u, ones, n_period, sat_burst;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;

    for (int k = 0; k < 3; k++) begin
      sy[k] = 0.0; su[k] = 0.0;
      for (int i = 0; i < L; i++) begin fy[k][i] = 0.0; fu[k][i] = 0.0; end
    end
    for (int i = 0; i < 5; i++) udel[i] = 0.0;

    // Two periods of the 2.75 kHz tone.
    n_period = int'(1.0e9 / (2750.0 * TCLK));
    emax = 0.0;
    for (int i = 0; i < 2 * n_period; i++) begin
      u = int'($floor(0.5 * 32767.0 * $sin(2.0 * 3.14159265358979 * 2750.0 * real'(i) * TCLK * 1.0e-9) + 0.5));
      cycle(u);
      ey = sinc3(fy, sy, spk_p ? 1.0 : -1.0, i % L);
      for (int d = 4; d > 0; d--) udel[d] = udel[d-1];
      udel[0] = real'(u) / 32768.0;
      eu = sinc3(fu, su, udel[4], i % L);
      if (i > 1000) begin
        err = ey - eu;
        if (err < 0.0) err = -err;
        if (err > emax) emax = err;
      end
    end
    expect_true(n_sat == 0, "no clamp during the tone");
    $display("tone: %0d clocks, max filtered error %f of full scale", 2 * n_period, emax);
    expect_true(emax < 1.0e-3, "tone reproduced by the bridge output");

    // Overload burst, then a DC level.
    for (int i = 0; i < 2000; i++) cycle(31130);
    sat_burst = n_sat;
    for (int i = 0; i < 3000; i++) cycle(9830);
    ones = 0;
    for (int i = 0; i < 8192; i++) begin
      cycle(9830);
      ones += int'(spk_p);
    end
    mean = 2.0 * real'(ones) / 8192.0 - 1.0;
    $display("DC after overload: mean %f, want %f", mean, 9830.0 / 32768.0);
    expect_true(mean - 9830.0 / 32768.0 < 1.0e-3 && 9830.0 / 32768.0 - mean < 1.0e-3,
                "DC level after overload");

    expect_true(n_sat == sat_burst, "no clamp once the overload has passed");
    expect_true(min_lag > 0.85 - EPS && max_lag < 0.85 + EPS, "bitstream to bridge delay");
    expect_true(max_xo <= 0.03 + EPS, "crossover pulses bounded by the cross-coupled pairs");
    $display("bitstream transitions %0d, bridge reversals %0d, crossover pulses %0d (max %f ns)",
             n_bit_edges, n_spk_edges, n_xo, max_xo);
    $display("skew-corrected transitions %0d, clamped clocks %0d", n_fixed, n_sat);
    expect_true(n_bit_edges > 0, "bitstream transitions happened");
    expect_true(n_spk_edges > 0, "bridge reversals happened");
    expect_true(n_xo > 0, "crossover pulses happened");
    expect_true(n_fixed > 0, "cross-coupled pairs shortened the n- skew");
    expect_true(n_sat > 0, "overload clamp happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TCLK * 30000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
