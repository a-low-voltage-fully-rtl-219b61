// Behavioural model of the fully-differential gate driver of the H-bridge.
//
// Not synthesizable logic: it stands for the chain of CMOS inverters that
// grows the 1-bit drive signals up to the very wide H-bridge transistors.
// Each line (p+ and n-) is three inverters sized 1x, 2x and 32x; after the 2x
// stage a pair of weak 1x cross-coupled inverters, and after the 32x stage a
// pair of 16x cross-coupled inverters, tie the two lines together so that
// they switch at the same instant (see xc_pair). The topology and sizes follow
// the published driver; the delay values are this model's own placeholders
// (the published circuit is only said to have rise/fall times below 1 ns).
//
// Interface: p_plus and n_minus are the complementary drive bits; gate_l and
// gate_r go to the gates of the left and right 384x bridge inverters. With
// three inversions per line, gate_l = ~p_plus and gate_r = ~n_minus, each
// STAGE1_NS + STAGE2_NS + STAGE3_NS after the input. N_SKEW_NS adds a delay
// to the n- line only. Its default is one inverter delay: n- is made from the
// bitstream by an extra inverter ahead of the chain, so it starts late, and
// the cross-coupled pairs take that skew out (it reaches the gates as at most
// XC2_NS).
//
// The cross-coupled pairs are loops of event-driven processes; a synthesis
// tool reads them as latches and combinational loops. That is what the
// circuit is (two inverters in a ring); the model is for simulation only.
`timescale 1ns / 1ps
module output_driver #(
  parameter real STAGE1_NS = 0.10,  // 1x inverter delay
  parameter real STAGE2_NS = 0.10,  // 2x inverter delay
  parameter real STAGE3_NS = 0.15,  // 32x inverter delay
  parameter real XC1_NS    = 0.05,  // 1x cross-coupled pair pull-over delay
  parameter real XC2_NS    = 0.03,  // 16x cross-coupled pair pull-over delay
  parameter real N_SKEW_NS = 0.10   // extra input delay on the n- line
) (
  input  logic p_plus,
  input  logic n_minus,
  output logic gate_l,
  output logic gate_r
);

  logic n_in_d;
  logic p1, n1;          // after the 1x stage
  logic p2_drv, n2_drv;  // 2x stage outputs
  logic p2, n2;          // nodes tied by the 1x cross-coupled pair
  logic p3_drv, n3_drv;  // 32x stage outputs

  assign #(N_SKEW_NS) n_in_d = n_minus;

  assign #(STAGE1_NS) p1 = ~p_plus;
  assign #(STAGE1_NS) n1 = ~n_in_d;
  assign #(STAGE2_NS) p2_drv = ~p1;
  assign #(STAGE2_NS) n2_drv = ~n1;

  xc_pair #(.XC_NS(XC1_NS)) u_xc1 (
    .drv_p (p2_drv),
    .drv_n (n2_drv),
    .node_p(p2),
    .node_n(n2)
  );

  assign #(STAGE3_NS) p3_drv = ~p2;
  assign #(STAGE3_NS) n3_drv = ~n2;

  xc_pair #(.XC_NS(XC2_NS)) u_xc2 (
    .drv_p (p3_drv),
    .drv_n (n3_drv),
    .node_p(gate_l),
    .node_n(gate_r)
  );

endmodule
