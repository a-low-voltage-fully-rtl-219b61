// Behavioural model of one pair of weak cross-coupled inverters between the
// two lines of a fully-differential buffer (helper of output_driver).
//
// Not synthesizable logic: it stands for a transistor-level circuit. Each of
// the two nodes is driven by a strong buffer stage (drv_p, drv_n) and, weakly,
// by an inverter from the opposite node. In a two-state, event-driven model
// that feed-forward is rendered as follows: when one node switches and the
// other's own driver has not yet followed, the weak inverter pulls the lagging
// node over XC_NS after the leading one. A later change of a node's own driver
// always takes the node, so with complementary inputs the pair's skew is never
// above XC_NS. The pull-over rule is this model's own simplification of the
// circuit; the published design gives only the topology and the inverter
// sizes. A synthesis tool reads the two processes as latches in a loop,
// which is what a ring of two inverters is; the model is for simulation only.
// 'assists_p' and 'assists_n' count how often the weak path moved a node first.
`timescale 1ns / 1ps
module xc_pair #(
  parameter real XC_NS = 0.05  // weak inverter delay, ns
) (
  input  logic drv_p,
  input  logic drv_n,
  output logic node_p,
  output logic node_n
);

  logic xc_p, xc_n;              // weak inverter outputs
  logic seen_p, seen_n;          // last driver values acted on
  logic armed = 1'b0;            // weak paths act once the pair has settled
  int unsigned assists_p = 0;    // pulls of node_p by the weak path
  int unsigned assists_n = 0;    // pulls of node_n by the weak path

  assign #(XC_NS) xc_p = ~node_n;
  assign #(XC_NS) xc_n = ~node_p;

  initial begin
    // Settle to the drivers once their delays have elapsed, then let the
    // weak paths act once their own outputs have settled too.
    #1;
    node_p = drv_p;
    seen_p = drv_p;
    node_n = drv_n;
    seen_n = drv_n;
    #1;
    armed = 1'b1;
  end

  always @(drv_p or xc_p) begin
    if (drv_p != seen_p) begin
      seen_p = drv_p;
      node_p = drv_p;
    end else if (armed && xc_p != node_p && xc_p != drv_p) begin
      node_p = xc_p;
      assists_p++;
    end
  end

  always @(drv_n or xc_n) begin
    if (drv_n != seen_n) begin
      seen_n = drv_n;
      node_n = drv_n;
    end else if (armed && xc_n != node_n && xc_n != drv_n) begin
      node_n = xc_n;
      assists_n++;
    end
  end

endmodule
