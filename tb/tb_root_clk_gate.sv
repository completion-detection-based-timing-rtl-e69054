// tb_root_clk_gate -- self-checking testbench for the root clock gate.
//
// Runs a 50 ns clock and, for random cycles, raises E (ERROR) shortly before
// a rising edge and drops it shortly after, the way the OR tree does. Checks
// that exactly that clock pulse is removed, that the other pulses pass
// whole, and that E rising or falling while the clock is high neither cuts
// nor creates a pulse. Counts gated pulses against requested ones.
module tb_root_clk_gate;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 50_000;

  logic clk;
  logic e;
  logic gclk;
  int   checks = 0;
  int   failures = 0;
  int   n_gated = 0;
  int   n_pass = 0;

  root_clk_gate dut (.clk(clk), .e(e), .gclk(gclk));

  task automatic expect_g(input logic exp, input string what, input int cyc);
    checks++;
    if (gclk !== exp) begin
      failures++;
      $display("FAIL %s cycle %0d at %0t: gclk=%0b expected %0b", what, cyc, $time, gclk, exp);
    end
  endtask

  initial begin
    #(1000 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    e   = 1'b0;
    #(T/2);
    for (int c = 0; c < 300; c++) begin
      logic gate_it;
      logic noise_high;
      gate_it    = ($urandom % 3) == 0;
      noise_high = ($urandom % 2) == 0;
      // late in the low phase: the OR tree evaluates
      #(T/2 - 1000);
      e = gate_it;
      #1000;
      clk = 1'b1;           // rising edge
      #20 e = 1'b0;         // ERROR precharges right after the edge
      #100 expect_g(!gate_it, gate_it ? "gated pulse" : "passed pulse", c);
      if (gate_it) n_gated++; else n_pass++;
      if (noise_high) begin
        // E toggles during the high phase: must not affect this pulse
        #(T/4) e = 1'b1;
        #100 expect_g(!gate_it, "E rises while clock high", c);
        #100 e = 1'b0;
        #(T/4 - 320);
      end else begin
        #(T/2 - 120);
      end
      expect_g(!gate_it, "end of high phase", c);
      clk = 1'b0;
      #10 expect_g(1'b0, "low phase", c);
    end
    checks++;
    if (n_gated == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL: gated=%0d passed=%0d, both must occur", n_gated, n_pass);
    end
    $display("gated pulses=%0d passed pulses=%0d", n_gated, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
