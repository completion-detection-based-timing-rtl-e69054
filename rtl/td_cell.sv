// td_cell -- transition detector (behavioural model of a custom standard cell).
//
// The cell compares the monitored net with an internally delayed copy of
// itself through an XOR: every toggle of `a` produces a high pulse on
// `td_out` whose width is the internal delay DELAY_PS. The
// XOR-against-delayed-copy structure is the cell described for this design,
// and so is the bound on its latency (below 0.5 ns at 0.4 V); the values
// used, 400 ps latency and a 500 ps pulse, are this model's choices.
//
// This is a behavioural model: both delays are simulation delays and are not
// synthesizable. It has the real cell's ports.
//   a       monitored critical-gate output
//   td_out  activity pulse, high for DELAY_PS after every edge of `a`
// Timing: td_out rises LATENCY_PS after an edge of `a` and falls DELAY_PS
// later. Toggles closer together than DELAY_PS merge or cancel, as in the
// real XOR cell.
module td_cell #(
  parameter int unsigned DELAY_PS   = 500,
  parameter int unsigned LATENCY_PS = 400
) (
  input  logic a,
  output logic td_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic a_lat;   // input as seen after the cell's latency
  logic a_del;   // internally delayed copy

  // Latency: every input edge is passed on (transport delay).
  always @(a) begin
    fork
      automatic logic v = a;
      #(LATENCY_PS) a_lat = v;
    join_none
  end

  // Internal delay element of the cell. A glitch shorter than the delay
  // never reaches the delayed copy, so the XOR then shows the glitch itself.
  assign #(DELAY_PS) a_del = a_lat;

  assign td_out = a_lat ^ a_del;
endmodule
