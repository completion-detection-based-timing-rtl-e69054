// root_clk_gate -- clock gate at the root of the system clock tree.
//
// When the OR tree raises ERROR just before a rising edge of the delayed
// clock, this gate suppresses that edge, so the system clock CLK_SYS skips
// one cycle and late signals get a whole extra period to settle. The design
// specifies only that the gate, driven by ERROR on its E input, halts the
// launch of CLK_SYS for one cycle. The glitch-free latch-based structure used
// here is this design's choice: a latch, transparent while `clk` is low,
// holds the inverted E input, and `gclk = clk & enable`. ERROR is therefore
// sampled at the rising edge of `clk`; changes of E while `clk` is high do not
// cut the current pulse short.
//   clk   delayed root clock CLK_DEL
//   e     gate-off request (ERROR): 1 at the rising edge of clk drops that pulse
//   gclk  gated system clock CLK_SYS
// Timing: E must be stable slightly before the rising edge of clk and may
// fall right after it; one E pulse removes exactly one clock pulse. The latch
// reported by lint tools is intended.
module root_clk_gate (
  input  logic clk,
  input  logic e,
  output logic gclk
);
  timeunit 1ps;
  timeprecision 1ps;

  logic en_lat;

  always_latch begin
    if (!clk)
      en_lat = !e;
  end

  assign gclk = clk & en_lat;
endmodule
