// Behavioural model of the bridge-tied-load (H-bridge) CMOS output stage.
//
// Not synthesizable logic: it stands for two very wide CMOS inverters (384
// unit inverters each, a unit being a 13 um PMOS and a 5 um NMOS) whose outputs
// drive the two ends of the speaker through an off-chip LC filter. Driven in
// antiphase they swing the load between +VDD and -VDD, twice what one side
// alone could give. The sizes follow the published stage; the delay is this
// model's own placeholder.
//
// Interface: gate_l and gate_r are the inverter gates; out_l = ~gate_l and
// out_r = ~gate_r, each OUT_NS later. crossover is high while both outputs sit
// at the same level, i.e. while both halves pull the load the same way: with
// matched drive it is high only for the skew left between the two gates.
`timescale 1ns / 1ps
module h_bridge #(
  parameter real OUT_NS = 0.5  // gate-to-output delay of the 384x inverters
) (
  input  logic gate_l,
  input  logic gate_r,
  output logic out_l,
  output logic out_r,
  output logic crossover
);

  assign #(OUT_NS) out_l = ~gate_l;
  assign #(OUT_NS) out_r = ~gate_r;
  assign crossover = (out_l == out_r);

endmodule
