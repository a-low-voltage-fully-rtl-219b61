// Third-order single-bit delta-sigma modulator.
//
// Turns a 16-bit PCM sample stream into a 1-bit stream whose short-term pulse
// density follows the audio signal, with the quantisation noise pushed out of
// the audio band. The loop is the published one: an integrator chain
//   delaying 1/(z-1)  ->  non-delaying z/(z-1)  ->  delaying 1/(z-1)  -> sign
// with the input fed in through b1, the chain coupled by b2 and b3, the
// output fed back through a1 (into the second integrator's input) and a2 (into
// the third), and a resonator path of gain delta from the last integrator back
// into the second one. In time steps n:
//   y[n]    = +1 if x3[n] >= 0, else -1
//   x2[n]   = x2[n-1] + b2*x1[n] - delta*x3[n] - a1*y[n]
//   x1[n+1] = x1[n]   + b1*(u[n] - y[n])
//   x3[n+1] = x3[n]   + b3*x2[n] - a2*y[n]
// which gives the noise transfer function
//   NTF = ((z-1)^3 + b3*delta*z*(z-1)) /
//         (z^3 - (k1-b3*delta)z^2 + (k2-b3*delta)z - (1-a2)).
// All coefficients are powers of two (defaults: a1=b1=b2=2^-2, a2=b3=2^-1,
// delta=2^-13), so every product is an arithmetic shift and the datapath is
// three adders-with-shifts and three registers: no multipliers.
//
// Number format (own choice): the states are signed PCM_W+FRAC_W+GUARD_W-bit
// words whose LSB is 2^-FRAC_W of a PCM LSB; y = +/-1 is +/-2^(PCM_W-1) PCM
// LSBs. Shifts round toward minus infinity. Every state update saturates at
// the word's range (own choice, not in the published design): inside the
// stable input range (about +/-0.7 of full scale) no clamp happens, and for
// larger inputs the clamp keeps the loop from wrapping so that it recovers
// once the input falls back. With the default single guard bit the clamp sits
// at twice full scale.
//
// Interface and timing: one PCM sample is taken on every rising clk edge (the
// published clock is 5.6 MHz, so the source must present PCM already at that
// rate). bit_out is a function of the x3 register only; a change of pcm_in
// first reaches bit_out two clocks later. sat is registered: it is high for the
// clock after an update that clamped. rst_n is asynchronous, active low, and
// clears all states (bit_out is then 1, as x3 = 0 counts as non-negative).
`timescale 1ns / 1ps
module dsm3_modulator
  import class_d_pkg::*;
#(
  parameter int unsigned PCM_BITS = PCM_W,
  parameter int unsigned FRAC_BITS = FRAC_W,
  parameter int unsigned GUARD_BITS = GUARD_W,
  parameter int unsigned A1_SH = A1_SHIFT,
  parameter int unsigned A2_SH = A2_SHIFT,
  parameter int unsigned B1_SH = B1_SHIFT,
  parameter int unsigned B2_SH = B2_SHIFT,
  parameter int unsigned B3_SH = B3_SHIFT,
  parameter int unsigned DELTA_SH = DELTA_SHIFT
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [PCM_BITS-1:0] pcm_in,
  output logic                       bit_out,
  output logic                       sat
);

  localparam int unsigned W = PCM_BITS + FRAC_BITS + GUARD_BITS;  // state word
  localparam int unsigned EW = W + 3;                             // adder word
  localparam logic signed [EW-1:0] FS = EW'(1) <<< (PCM_BITS - 1 + FRAC_BITS);
  localparam logic signed [EW-1:0] ST_MAX = (EW'(1) <<< (W - 1)) - EW'(1);
  localparam logic signed [EW-1:0] ST_MIN = -(EW'(1) <<< (W - 1));

  typedef logic signed [W-1:0] state_t;
  typedef logic signed [EW-1:0] wide_t;

  state_t x1_q, x2_q, x3_q;
  state_t x1_d, x2_d, x3_d;
  logic   sat_d;

  // Clamp a wide sum to the state range; report whether it clamped.
  function automatic state_t clamp(input wide_t v, output logic hit);
    if (v > ST_MAX) begin
      hit = 1'b1;
      return state_t'(ST_MAX);
    end else if (v < ST_MIN) begin
      hit = 1'b1;
      return state_t'(ST_MIN);
    end
    hit = 1'b0;
    return state_t'(v);
  endfunction

  always_comb begin
    wide_t yv, u_w, x1_w, x2_w, x3_w, x2_new_w, s1, s2, s3;
    logic  h1, h2, h3;
    yv   = x3_q[W-1] ? -FS : FS;
    u_w  = wide_t'(pcm_in) <<< FRAC_BITS;
    x1_w = wide_t'(x1_q);
    x2_w = wide_t'(x2_q);
    x3_w = wide_t'(x3_q);
    // Second integrator (non-delaying): its new value is used this cycle.
    s2   = x2_w + (x1_w >>> B2_SH) - (x3_w >>> DELTA_SH) - (yv >>> A1_SH);
    x2_d = clamp(s2, h2);
    x2_new_w = wide_t'(x2_d);
    // First and third integrators (delaying).
    s1   = x1_w + ((u_w - yv) >>> B1_SH);
    x1_d = clamp(s1, h1);
    s3   = x3_w + (x2_new_w >>> B3_SH) - (yv >>> A2_SH);
    x3_d = clamp(s3, h3);
    sat_d = h1 | h2 | h3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1_q <= '0;
      x2_q <= '0;
      x3_q <= '0;
      sat  <= 1'b0;
    end else begin
      x1_q <= x1_d;
      x2_q <= x2_d;
      x3_q <= x3_d;
      sat  <= sat_d;
    end
  end

  // Single-bit quantiser: 1 stands for +1, 0 for -1.
  assign bit_out = ~x3_q[W-1];

endmodule
