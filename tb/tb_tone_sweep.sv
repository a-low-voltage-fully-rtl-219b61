// Level sweep of the 2.75 kHz test tone through class_d_amp (defaults).
//
// The published distortion-versus-output-power measurement drives the
// amplifier with a 2.75 kHz tone at rising levels. This testbench plays the
// tone at 0.1, 0.3, 0.5 and 0.7 of full scale, each from reset for 3000
// clocks, and for each level checks that:
//   * the modulator never clamps (all four levels are inside its stable range);
//   * the bridge output, read as +/-1 and passed through a sinc^3 filter
//     (three length-64 moving averages), matches the input through the same
//     filter, 4 clocks delayed, to 1e-3 of full scale after 1000 clocks;
//   * the tone amplitude measured on the filtered bridge output by
//     correlation with the input sine is within 1% of the input's.
`timescale 1ns / 1ps
module tb_tone_sweep;
  import class_d_pkg::*;

  localparam real TCLK = 177.154;
  localparam int  L = 64;
  localparam real TWO_PI = 6.28318530717959;

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

  task automatic play(real amp);
    real ey, eu, err, emax, cy_s, cy_c, cu_s, cu_c, ph, ry, ru;
    int u, nsat;
    rst_n = 1'b0;
    pcm_in = '0;
    for (int k = 0; k < 3; k++) begin
      sy[k] = 0.0; su[k] = 0.0;
      for (int i = 0; i < L; i++) begin fy[k][i] = 0.0; fu[k][i] = 0.0; end
    end
    for (int i = 0; i < 5; i++) udel[i] = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    emax = 0.0; nsat = 0;
    cy_s = 0.0; cy_c = 0.0; cu_s = 0.0; cu_c = 0.0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      nsat += int'(sat);
      u = int'($floor(amp * 32767.0 * $sin(TWO_PI * 2750.0 * real'(i) * TCLK * 1.0e-9) + 0.5));
      ey = sinc3(fy, sy, spk_p ? 1.0 : -1.0, i % L);
      for (int d = 4; d > 0; d--) udel[d] = udel[d-1];
      udel[0] = real'(u) / 32768.0;
      eu = sinc3(fu, su, udel[4], i % L);
      pcm_in = PCM_W'(u);
      if (i >= 1000) begin
        err = (ey > eu) ? ey - eu : eu - ey;
        if (err > emax) emax = err;
        ph = TWO_PI * 2750.0 * real'(i) * TCLK * 1.0e-9;
        cy_s += ey * $sin(ph); cy_c += ey * $cos(ph);
        cu_s += eu * $sin(ph); cu_c += eu * $cos(ph);
      end
    end
    ry = $sqrt(cy_s * cy_s + cy_c * cy_c);
    ru = $sqrt(cu_s * cu_s + cu_c * cu_c);
    $display("level %4.2f: max filtered error %f, amplitude ratio %f, clamps %0d",
             amp, emax, ry / ru, nsat);
    checks += 3;
    if (nsat != 0) begin failures++; $display("FAIL clamped at level %f", amp); end
    if (emax > 1.0e-3) begin failures++; $display("FAIL error at level %f", amp); end
    if (ry / ru < 0.99 || ry / ru > 1.01) begin failures++; $display("FAIL gain at level %f", amp); end
  endtask

  initial begin
    play(0.1);
    play(0.3);
    play(0.5);
    play(0.7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TCLK * 20000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
