// Shared constants of the delta-sigma class-D amplifier.
//
// The loop-filter coefficients of the third-order modulator are all powers of
// two, so each one is stored here as the right-shift that realises it:
//   a1 = 2^-2, a2 = 2^-1, b1 = 2^-2, b2 = 2^-2, b3 = 2^-1, delta = 2^-13.
// These are the coefficient values of the published design. The input word
// (16-bit PCM) and the 5.6 MHz modulator clock also follow it. The internal
// word split (8 fraction bits below the PCM LSB, 1 guard bit above full
// scale) is this implementation's own choice, sized from a numerical model:
// below the modulator's overload point (about 0.7 of full scale) no state
// exceeds 1.2x full scale, so the states span +/-2x full scale. That range is
// also the saturation level of the integrators, and it was chosen small on
// purpose: with a +/-4x range the loop could, after an overload, stay in a
// large clamped oscillation; with +/-2x it returned to normal operation in
// every overload case tried.
`timescale 1ns / 1ps
package class_d_pkg;

  localparam int unsigned PCM_W = 16;   // PCM input word
  localparam int unsigned FRAC_W = 8;   // fraction bits kept below the PCM LSB
  localparam int unsigned GUARD_W = 1;  // headroom bit above full scale

  // Coefficients as arithmetic right-shifts (the published loop-filter values).
  localparam int unsigned A1_SHIFT = 2;
  localparam int unsigned A2_SHIFT = 1;
  localparam int unsigned B1_SHIFT = 2;
  localparam int unsigned B2_SHIFT = 2;
  localparam int unsigned B3_SHIFT = 1;
  localparam int unsigned DELTA_SHIFT = 13;
endpackage
