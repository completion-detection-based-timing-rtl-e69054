// dyn_or -- wide fan-in dynamic OR gate with evaluation enable.
//
// Models the custom dynamic OR cell: a pull-down network of FANIN parallel
// NMOS transistors on a precharged node, with a keeper, followed by the
// output inverter. While `e_dyn` is low the node is precharged and `out` is
// 0. While `e_dyn` is high the gate evaluates: as soon as any input is 1 the
// node discharges and `out` goes to 1. A discharged node cannot recharge
// before the next precharge, so `out` stays 1 for the rest of the evaluation
// pulse even if the input that discharged it falls again; this is what makes
// the gate take a snapshot of short transition-detector pulses.
//
// The 10-input width and the precharge/evaluate behaviour follow the cell
// described for this design. Representing the monotonic dynamic node as a
// set/reset latch is this model's choice (the design's circuit is a domino
// gate, which has the same logic behaviour).
//   e_dyn  evaluate (1) / precharge (0)
//   in     FANIN inputs
//   out    0 during precharge; 1 from the first 1 on `in` during evaluation
// Timing: `out` follows the dynamic node after DELAY_PS, the gate's
// propagation delay (bounded by the design at 0.5 ns; 400 ps is this
// model's value). The delay is a simulation annotation that synthesis
// ignores. The latch reported by lint tools is intended: it is the dynamic
// node held by the keeper.
module dyn_or #(
  parameter int unsigned FANIN    = 10,
  parameter int unsigned DELAY_PS = 400
) (
  input  logic             e_dyn,
  input  logic [FANIN-1:0] in,
  output logic             out
);
  timeunit 1ps;
  timeprecision 1ps;

  // Transparent while precharging (passes 0) or while an input discharges
  // the node (passes 1); otherwise the keeper holds the node.
  logic node_dis;   // 1 = dynamic node discharged

  always_latch begin
    if (!e_dyn || (|in))
      node_dis = e_dyn;
  end

  // Output inverter, with the gate's propagation delay.
  assign #(DELAY_PS) out = node_dis;
endmodule
