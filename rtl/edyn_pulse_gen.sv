// edyn_pulse_gen -- programmable delay line and E_DYN evaluation pulse
// (behavioural model).
//
// The root clock CLK_IN goes through a programmable delay to become CLK_DEL,
// which feeds the root clock gate. The evaluation pulse E_DYN for the dynamic
// OR tree is high from the rising edge of CLK_IN until the rising edge of
// CLK_DEL, so the tree takes its snapshot of the transition detectors just
// before the system clock launches, and the pulse width equals the
// programmed delay. The delay range, 0.25 ns to 4 ns in 0.25 ns steps with a
// thermometer-coded setting, follows the design; the 15-bit code (number of
// ones n, delay = (n + 1) * 0.25 ns, 16 settings) is this model's reading of
// it. The delay line in silicon is a NAND-gate ladder; here it is a
// behavioural transport delay, so the module is not synthesizable.
//   clk_in    root clock
//   dly_code  thermometer code, ones from bit 0 upward (asserted when clk_in rises)
//   clk_del   clk_in delayed by (n + 1) * STEP_PS
//   e_dyn     clk_in & !clk_del, seen through a gate delay of GATE_PS
// Timing: e_dyn rises GATE_PS after clk_in rises and falls GATE_PS after
// clk_del rises, so it ends just after the clock gate has sampled ERROR.
// Change dly_code only while clk_in is low and the line is idle. clk_del is
// valid from the first clk_in edge plus one delay after power-up.
module edyn_pulse_gen #(
  parameter int unsigned STEP_PS = 250,
  parameter int unsigned CODE_W  = 15,
  parameter int unsigned GATE_PS = 20
) (
  input  logic              clk_in,
  input  logic [CODE_W-1:0] dly_code,
  output logic              clk_del,
  output logic              e_dyn
);
  timeunit 1ps;
  timeprecision 1ps;

  int unsigned delay_ps;

  always_comb delay_ps = STEP_PS * ($countones(dly_code) + 1);

  // Programmable delay line (transport delay: every edge is passed on).
  always @(clk_in) begin
    fork
      automatic logic        v = clk_in;
      automatic int unsigned d = delay_ps;
      #(d) clk_del = v;
    join_none
  end

  // Pulse gate: high while the clock has risen at the input of the line but
  // not yet at its output.
  assign #(GATE_PS) e_dyn = clk_in & !clk_del;

  // The setting must be a thermometer code: ones only from bit 0 upward.
  always @(posedge clk_in) begin
    assert ((dly_code & (dly_code + 1'b1)) == '0)
      else $error("edyn_pulse_gen: dly_code %b is not a thermometer code", dly_code);
  end
endmodule
