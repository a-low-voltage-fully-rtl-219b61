// Self-checking testbench of dsm3_modulator.
//
// A reference model of the loop, written here from the difference equations
// with 64-bit integers and floor division, runs next to the modulator and must
// match its bitstream and saturation flag bit for bit. On top of that, three
// checks that do not depend on the reference:
//   * reset: all states clear, so the output is +1 (bit 1) and sat is 0;
//   * DC inputs: the mean of the +/-1 output over 16384 clocks equals the
//     input as a fraction of full scale to within 1e-3;
//   * a 2.75 kHz sine at half scale: the bitstream and the input, both passed
//     through the same third-order moving-average (sinc^3, length 64) filter,
//     agree to within 1e-3 of full scale once the input is delayed 4 clocks,
//     which only holds if the loop shapes its noise out of the audio band;
//   * overload: a 0.95 full-scale input makes an integrator clamp, and the
//     loop tracks a DC input correctly again once the input drops.
// Clock: 5.6448 MHz (177.154 ns), one PCM sample per clock.
`timescale 1ns / 1ps
module tb_dsm3_modulator;
  import class_d_pkg::*;

  localparam real TCLK = 177.154;
  localparam int  FRAC = FRAC_W;
  localparam longint FSI = longint'(1) <<< (PCM_W - 1 + FRAC);
  localparam longint SMAX = (longint'(1) <<< (PCM_W + FRAC + GUARD_W - 1)) - 1;
  localparam longint SMIN = -(longint'(1) <<< (PCM_W + FRAC + GUARD_W - 1));
  localparam int  L = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [PCM_W-1:0] pcm_in = '0;
  logic bit_out, sat;

  int checks = 0;
  int failures = 0;

  dsm3_modulator dut (
    .clk(clk), .rst_n(rst_n), .pcm_in(pcm_in), .bit_out(bit_out), .sat(sat)
  );

  always #(TCLK / 2) clk = ~clk;

  // ---- reference model -------------------------------------------------
  longint r1, r2, r3;
  logic   rsat;

  function automatic longint fdiv(longint v, int k);  // floor(v / 2^k)
    longint d = longint'(1) <<< k;
    longint q = v / d;
    if ((v % d != 0) && (v < 0)) q = q - 1;
    return q;
  endfunction

  function automatic longint lim(longint v, ref logic hit);
    if (v > SMAX) begin hit = 1'b1; return SMAX; end
    if (v < SMIN) begin hit = 1'b1; return SMIN; end
    return v;
  endfunction

  function automatic logic ref_bit();
    return (r3 >= 0);
  endfunction

  task automatic ref_step(longint u);
    longint yv, n1, n2, n3;
    logic h = 1'b0;
    yv = (r3 >= 0) ? FSI : -FSI;
    n2 = lim(r2 + fdiv(r1, 2) - fdiv(r3, 13) - fdiv(yv, 2), h);  // a1,b2 = 1/4
    n1 = lim(r1 + fdiv(u * (longint'(1) <<< FRAC) - yv, 2), h);  // b1 = 1/4
    n3 = lim(r3 + fdiv(n2, 1) - fdiv(yv, 1), h);                 // b3,a2 = 1/2
    r1 = n1; r2 = n2; r3 = n3; rsat = h;
  endtask

  // ---- one clock: compare, then apply the next sample -------------------
  task automatic step(int u);
    checks++;
    if (bit_out !== ref_bit() || sat !== rsat) begin
      failures++;
      if (failures < 10)
        $display("mismatch t=%0t u=%0d bit=%0b ref=%0b sat=%0b ref=%0b",
                 $time, pcm_in, bit_out, ref_bit(), sat, rsat);
    end
    pcm_in = PCM_W'(u);
    @(posedge clk);
    ref_step(longint'(u));
    #1;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    r1 = 0; r2 = 0; r3 = 0; rsat = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    checks++;
    if (bit_out !== 1'b1 || sat !== 1'b0) begin
      failures++;
      $display("reset state wrong: bit=%0b sat=%0b", bit_out, sat);
    end
  endtask

  task automatic dc_test(int u, int settle, int n);
    int ones = 0;
    real mean, want;
    repeat (settle) step(u);
    for (int i = 0; i < n; i++) begin
      ones += int'(bit_out);
      step(u);
    end
    mean = 2.0 * real'(ones) / real'(n) - 1.0;
    want = real'(u) / 32768.0;
    checks++;
    if (mean - want > 1.0e-3 || want - mean > 1.0e-3) begin
      failures++;
      $display("DC u=%0d mean=%f want=%f", u, mean, want);
    end
  endtask

  // sinc^3 filter state for the sine test
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

  task automatic sine_test(int n);
    real ey, eu, emax = 0.0, err;
    int u;
    for (int k = 0; k < 3; k++) begin
      sy[k] = 0.0; su[k] = 0.0;
      for (int i = 0; i < L; i++) begin fy[k][i] = 0.0; fu[k][i] = 0.0; end
    end
    for (int i = 0; i < 5; i++) udel[i] = 0.0;
    for (int i = 0; i < n; i++) begin
      u = int'($floor(0.5 * 32767.0 * $sin(2.0 * 3.14159265358979 * 2750.0 * real'(i) * TCLK * 1.0e-9) + 0.5));
      ey = sinc3(fy, sy, bit_out ? 1.0 : -1.0, i % L);
      for (int d = 4; d > 0; d--) udel[d] = udel[d-1];
      udel[0] = real'(u) / 32768.0;
      eu = sinc3(fu, su, udel[4], i % L);
      if (i > 1000) begin
        err = ey - eu;
        if (err < 0.0) err = -err;
        if (err > emax) emax = err;
      end
      step(u);
    end
    checks++;
    if (emax > 1.0e-3) begin
      failures++;
      $display("sine: filtered error %f of full scale", emax);
    end
    $display("sine 2.75 kHz: max filtered error %f of full scale", emax);
  endtask

  int sat_seen;

  initial begin
    do_reset();
    // random inputs inside the stable range, random hold times
    for (int blk = 0; blk < 400; blk++) begin
      int u = int'($urandom_range(39322)) - 19661;  // +/-0.6 FS
      int hold = int'($urandom_range(60)) + 1;
      repeat (hold) step(u);
    end
    // DC accuracy
    dc_test(0, 2000, 16384);
    dc_test(16384, 2000, 16384);
    dc_test(-8192, 2000, 16384);
    dc_test(19661, 2000, 16384);
    dc_test(-22000, 2000, 16384);
    // in-band noise shaping on the test tone
    do_reset();
    sine_test(12000);
    // overload and recovery
    sat_seen = 0;
    for (int i = 0; i < 3000; i++) begin
      step(31130);  // 0.95 FS
      sat_seen += int'(sat);
    end
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("overload never clamped an integrator");
    end
    dc_test(9830, 4000, 16384);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TCLK * 200000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
