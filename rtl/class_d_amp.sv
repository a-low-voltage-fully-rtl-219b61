// Single-chip delta-sigma class-D audio amplifier, PCM in, speaker drive out.
//
// A 16-bit PCM sample stream enters a third-order single-bit delta-sigma
// modulator clocked at 5.6 MHz. Its 1-bit output is split into a true drive
// (p+) and an inverted drive (n-), which a fully-differential inverter chain
// with cross-coupled skew-equalising inverters grows up to the gates of a CMOS
// H-bridge. The two bridge outputs, spk_p and spk_n, leave the chip for a
// balanced LC low-pass filter and the speaker, which recover the audio from
// the pulse density. No PWM mapping and no linearisation DSP are needed: the
// modulator alone shapes the quantisation noise out of the audio band.
//
// The chain and its parts follow the published amplifier. The modulator is
// synthesizable logic; the driver chain and the H-bridge are behavioural
// models with placeholder delays. The LC filter, speaker, bypass capacitors
// and pads are analog parts outside this RTL.
//
// Interface and timing: pcm_in is read on every rising clk edge (the source
// must already run at the modulator rate; no interpolation filter is part of
// the design). bitstream changes right after a clock edge, two clocks after
// the input sample that first affects it. spk_p follows bitstream and spk_n
// its complement, about 1 ns later. crossover is high while both bridge
// outputs are at the same level; sat reports a clamped modulator state.
`timescale 1ns / 1ps
module class_d_amp
  import class_d_pkg::*;
#(
  parameter int unsigned PCM_BITS = PCM_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [PCM_BITS-1:0] pcm_in,
  output logic                       bitstream,
  output logic                       sat,
  output logic                       spk_p,
  output logic                       spk_n,
  output logic                       crossover
);

  logic p_plus, n_minus;
  logic gate_l, gate_r;

  dsm3_modulator #(.PCM_BITS(PCM_BITS)) u_dsm (
    .clk    (clk),
    .rst_n  (rst_n),
    .pcm_in (pcm_in),
    .bit_out(bitstream),
    .sat    (sat)
  );

  // Phase split: p+ carries the bitstream, n- its inverse.
  assign p_plus  = bitstream;
  assign n_minus = ~bitstream;

  output_driver u_drv (
    .p_plus (p_plus),
    .n_minus(n_minus),
    .gate_l (gate_l),
    .gate_r (gate_r)
  );

  h_bridge u_hb (
    .gate_l   (gate_l),
    .gate_r   (gate_r),
    .out_l    (spk_p),
    .out_r    (spk_n),
    .crossover(crossover)
  );

endmodule
