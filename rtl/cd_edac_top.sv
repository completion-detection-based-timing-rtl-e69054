// cd_edac_top -- completion-detection timing error detection and correction.
//
// Instead of re-sampling endpoints after the clock edge (double sampling),
// this circuit watches the critical gates themselves. Every monitored
// critical gate of the host datapath drives a transition detector (td_cell)
// that pulses while the gate toggles. Just before each launch of the system
// clock, a short evaluation pulse E_DYN lets a dynamic OR tree (dyn_or_tree)
// take a snapshot of all detector outputs. If any critical gate is still
// switching, the tree raises ERROR and the root clock gate (root_clk_gate)
// drops that edge of CLK_SYS: the datapath gets one more clock period to
// settle, and nothing wrong is ever captured, so no other correction is
// needed. Because the snapshot is taken before the edge, activity after the
// edge (short paths) is never seen, and no hold padding is required.
//
// Sizes follow the design: 1000 detector slots (950 critical gates plus 50
// added to fill the tree) feeding a 3-stage tree of 10-input gates, and an
// E_DYN width programmable from 0.25 ns to 4 ns (edyn_pulse_gen). The host
// RISC-V processor is not part of this module: its monitored critical nodes
// come in on `crit_node` and it is clocked by `clk_sys`. Detector slots
// above N_TD are tied to 0. The detector pulse width, the 15-bit thermometer
// code and the cell delays (400 ps detector latency and 400 ps per OR stage,
// inside the design's bounds of 0.5 ns each and 2 ns in total) are this
// model's choices.
//
// The detector cells and the delay line are behavioural models with delays,
// so this module is meant for event-driven simulation with timing; the tree
// and the clock gate are synthesizable.
//   clk_in     root clock CLK_IN
//   dly_code   thermometer code for the E_DYN width / CLK_DEL delay
//   crit_node  outputs of the monitored critical gates
//   clk_sys    gated system clock for the host
//   clk_del    delayed, ungated root clock
//   e_dyn      evaluation pulse
//   error      ERROR: a critical gate toggled during the evaluation pulse
// Timing: CLK_SYS rises (n + 1) * 0.25 ns after CLK_IN rises, except in a
// cycle where ERROR was raised, where it stays low for that whole period.
// A gate toggle at time t is corrected when its detector pulse
// [t + 0.4 ns, t + 0.9 ns) overlaps E_DYN early enough for the 3 OR stages
// (1.2 ns) to deliver ERROR before CLK_DEL rises. With the default delays
// this needs an E_DYN width above 1.22 ns, so at least 1.25 ns (n >= 4):
// a narrower pulse ends before any ERROR can reach the clock gate. The
// window of toggle times that is caught is then (width - 0.72 ns) wide,
// ending 1.6 ns (the detection delay) before the CLK_SYS edge.
module cd_edac_top #(
  parameter int unsigned N_TD        = 1000,
  parameter int unsigned FANIN       = 10,
  parameter int unsigned LEVELS      = 3,
  parameter int unsigned CODE_W      = 15,
  parameter int unsigned TD_DELAY_PS   = 500,
  parameter int unsigned TD_LATENCY_PS = 400,
  parameter int unsigned OR_DELAY_PS   = 400
) (
  input  logic              clk_in,
  input  logic [CODE_W-1:0] dly_code,
  input  logic [N_TD-1:0]   crit_node,
  output logic              clk_sys,
  output logic              clk_del,
  output logic              e_dyn,
  output logic              error
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_SLOT = FANIN ** LEVELS;

  if (N_TD > N_SLOT) begin : g_size_err
    $error("cd_edac_top: N_TD exceeds the FANIN**LEVELS slots of the OR tree");
  end

  logic [N_SLOT-1:0] td_out;

  for (genvar i = 0; i < N_SLOT; i++) begin : g_td
    if (i < N_TD) begin : g_used
      td_cell #(.DELAY_PS(TD_DELAY_PS), .LATENCY_PS(TD_LATENCY_PS)) u_td (
        .a      (crit_node[i]),
        .td_out (td_out[i])
      );
    end else begin : g_unused
      assign td_out[i] = 1'b0;
    end
  end

  edyn_pulse_gen #(.CODE_W(CODE_W)) u_edyn (
    .clk_in   (clk_in),
    .dly_code (dly_code),
    .clk_del  (clk_del),
    .e_dyn    (e_dyn)
  );

  dyn_or_tree #(.FANIN(FANIN), .LEVELS(LEVELS), .DELAY_PS(OR_DELAY_PS)) u_tree (
    .e_dyn  (e_dyn),
    .td_out (td_out),
    .error  (error)
  );

  root_clk_gate u_cg (
    .clk  (clk_del),
    .e    (error),
    .gclk (clk_sys)
  );
endmodule
