// tb_error_rate_sweep -- corrected timing errors per 10000 cycles while the
// datapath is slowed down.
//
// Lowering the supply voltage slows every path, so the slowdown factor s
// used here stands in for the supply. The host is modelled as 20 critical
// paths with nominal endpoint arrivals from 38.5 ns to 41.35 ns in a 50 ns
// clock period. Each path is a chain of 17 monitored gates 0.5 ns apart,
// ending 0.4 ns before its endpoint, all on detector slots of the
// full-size top. Every cycle one path is launched, chosen at random, with
// all its delays scaled by s and by a random local variation of about 1 %.
// For each s the run covers 2000 cycles and reports the number of gated
// (corrected) edges per 10000 cycles.
//
// Checks: no stale value is ever captured; at most one CLK_IN edge is
// gated per launch; no corrections at s = 1.00 (the margined
// operating point); the error rate never falls as s grows; and corrections
// do occur at the largest slowdown, where the slowest paths arrive up to
// 4 ns late.
module tb_error_rate_sweep;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_TD   = 1000;
  localparam int unsigned CODE_W = 15;
  localparam int unsigned T      = 50_000;
  localparam int unsigned P      = 20;       // critical paths
  localparam int unsigned K      = 17;       // monitored gates per path
  localparam int unsigned S      = 500;      // nominal gate spacing
  localparam int unsigned TAIL   = 400;      // last gate to endpoint
  localparam int unsigned A0     = 38_500;   // fastest of the critical paths
  localparam int unsigned DA     = 150;      // arrival step between paths
  localparam int unsigned CYC    = 2000;     // cycles per slowdown point
  localparam int unsigned N_S    = 6;
  localparam int unsigned SCALE_PM [N_S] = '{1000, 1100, 1150, 1200, 1250, 1300};

  logic              clk_in;
  logic [CODE_W-1:0] dly_code;
  logic [N_TD-1:0]   crit_node;
  logic              clk_sys, clk_del, e_dyn, error;

  cd_edac_top dut (
    .clk_in(clk_in), .dly_code(dly_code), .crit_node(crit_node),
    .clk_sys(clk_sys), .clk_del(clk_del), .e_dyn(e_dyn), .error(error)
  );

  int checks = 0;
  int failures = 0;
  int n_in = 0, n_sys = 0, n_stale = 0;
  int unsigned scale_pm = 1000;
  int unsigned src_q = 0;
  int unsigned endpoint = 0;
  bit          run = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // about N(1, 0.01) in parts per million, from a sum of uniforms
  function automatic int unsigned variation_ppm();
    int acc = 0;
    repeat (12) acc += int'($urandom % 10_001);
    return int'(1_000_000) + (acc - 60_006);
  endfunction

  initial begin
    clk_in = 1'b0;
    forever begin
      #(T/2) clk_in = 1'b1;
      n_in++;
      #(T/2) clk_in = 1'b0;
    end
  end

  initial begin
    #(time'(N_S * CYC * 2 + 20) * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // capture, then launch one randomly chosen path
  always @(posedge clk_sys) begin
    n_sys++;
    if (run) begin
      int unsigned p, v;
      longint      f;    // total scale, parts per billion
      if (endpoint != src_q) n_stale++;
      src_q++;
      p = $urandom % P;
      f = longint'(scale_pm) * longint'(variation_ppm());
      for (int j = 0; j < int'(K); j++) begin
        automatic longint nominal = longint'(A0 + p * DA) - longint'(TAIL) - longint'((K - 1 - j) * S);
        fork
          automatic int unsigned idx = p * K + j;
          automatic time         dt  = time'(nominal * f / 1_000_000_000);
          begin
            #(dt);
            crit_node[idx] = !crit_node[idx];
          end
        join_none
      end
      v = src_q;
      fork
        automatic int unsigned vv = v;
        automatic time         da = time'(longint'(A0 + p * DA) * f / 1_000_000_000);
        begin
          #(da);
          endpoint = vv;
        end
      join_none
    end
  end

  initial begin
    int rate [N_S];
    crit_node = '0;
    dly_code  = CODE_W'(31);     // E_DYN 1.5 ns
    repeat (3) @(posedge clk_sys);
    run = 1'b1;
    for (int k = 0; k < int'(N_S); k++) begin
      int in0, sys0, gated;
      // count from a falling CLK_IN edge, when both counters are settled
      @(negedge clk_in);
      scale_pm = SCALE_PM[k];
      in0 = n_in; sys0 = n_sys;
      wait (n_in - in0 >= int'(CYC));
      @(negedge clk_in);
      gated = (n_in - in0) - (n_sys - sys0);
      rate[k] = gated * 10_000 / (n_in - in0);
      $display("slowdown %0d.%03d: %0d cycles, %0d corrected, %0d per 10000 cycles",
               SCALE_PM[k] / 1000, SCALE_PM[k] % 1000, n_in - in0, gated, rate[k]);
      check(gated >= 0 && gated <= int'(CYC) / 2 + 1, "CLK_SYS pulses against CLK_IN pulses");
      if (k == 0) check(rate[k] == 0, "corrections at the margined operating point");
      else        check(rate[k] >= rate[k-1], "error rate fell while slowing down");
    end
    check(rate[N_S-1] > 0, "no corrections at the largest slowdown");
    check(n_stale == 0, $sformatf("%0d stale captures", n_stale));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
