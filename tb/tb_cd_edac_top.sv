// tb_cd_edac_top -- end-to-end testbench of the completion-detection EDaC.
//
// The top is used at its default sizes (1000 detector slots, 3-stage 10:1
// tree). A behavioural host datapath, clocked by CLK_SYS, stands in for the
// processor:
//   * A source register launches a new value at every CLK_SYS edge. It
//     travels along a critical path of K = 17 monitored gates spaced 0.5 ns
//     apart, then 0.4 ns more to an endpoint register. The path delay is
//     drawn per launch, so the endpoint arrives either well before the next
//     edge, just before it, or up to 6 ns after it (a timing error without
//     correction). The chain of monitored gates makes the window about 6 ns
//     wide, the same width as the chosen detection window of the design.
//   * Each launch also toggles one monitored gate 0.1 ns after the edge (a
//     short path that would need hold padding under double sampling) and
//     20 other monitored gates early in the cycle (non-critical activity).
// A reference, computed from the toggle times, the detector latency and
// pulse width, the OR-stage delays and the programmed E_DYN window, predicts
// for every CLK_IN edge whether the edge must be gated and whether ERROR
// must (or must not) pulse. The testbench checks ERROR and CLK_SYS against it, checks
// that the endpoint register never captures a stale value, and checks the
// cycle count: every corrected error costs exactly one CLK_IN period.
// Two delay settings are used (1.5 ns and 2.5 ns E_DYN). The run counts each
// mechanism (corrections, late arrivals caught, stale captures prevented,
// fast-path toggles ignored, clean cycles, both settings) and fails if one
// never happened.
module tb_cd_edac_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_TD   = 1000;
  localparam int unsigned CODE_W = 15;
  localparam int unsigned T      = 50_000;   // CLK_IN period, 20 MHz
  localparam int unsigned STEP   = 250;
  localparam int unsigned GATE   = 20;       // pulse-gate delay of edyn_pulse_gen
  localparam int unsigned TDW    = 500;      // detector pulse width
  localparam int unsigned TDL    = 400;      // detector latency
  localparam int unsigned ORD    = 400;      // delay of one OR stage
  localparam int unsigned LEVELS = 3;
  localparam int unsigned K      = 17;       // monitored gates on the critical path
  localparam int unsigned S      = 500;      // spacing of the monitored gates
  localparam int unsigned TAIL   = 400;      // last monitored gate to endpoint
  localparam int unsigned N_BG   = 20;       // background toggles per launch
  localparam int unsigned CYCLES = 400;

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

  // mechanism counters
  int n_in = 0, n_sys = 0, n_err = 0;
  int n_late = 0, n_late_caught = 0, n_prevented = 0, n_fast = 0, n_clean = 0;
  int n_set1 = 0, n_set2 = 0, n_close = 0;

  // host model state
  bit           host_run = 1'b0;
  int unsigned  src_q = 0;
  int unsigned  endpoint = 0;
  int unsigned  chain_idx [K];
  int unsigned  fast_idx;
  time          toggles [$];      // times of all scheduled monitored toggles
  bit           err_seen;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic toggle_at(input int unsigned idx, input time dt);
    toggles.push_back($time + dt);
    fork
      begin
        #(dt);
        crit_node[idx] = !crit_node[idx];
      end
    join_none
  endtask

  initial begin
    #(time'(CYCLES + 10) * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge error) err_seen = 1'b1;

  // Host datapath: capture at the endpoint, then launch a new value.
  always @(posedge clk_sys) begin
    n_sys++;
    if (host_run) begin
      int   a;       // endpoint arrival relative to the next ungated edge
      int   kind;
      time  d;
      check(endpoint == src_q, "endpoint register captured a stale value");
      src_q++;
      kind = int'($urandom % 5);
      if (kind < 2) begin
        a = 100 + int'($urandom % 6000);            // late: timing error without EDaC
        n_late++;
      end else if (kind < 4) begin
        a = -4000 - int'($urandom % 16000);         // comfortably early
      end else begin
        a = -int'($urandom % 1500);                 // marginal, inside the inherent margin
      end
      d = time'(int'(T) - int'((K - 1) * S + TAIL) + a);
      for (int i = 0; i < int'(K); i++) toggle_at(chain_idx[i], d + time'(i * S));
      fork
        automatic int unsigned v = src_q;
        automatic time         da = d + (K - 1) * S + TAIL;
        begin
          #(da);
          endpoint = v;
        end
      join_none
      // short path right after the edge
      toggle_at(fast_idx, 100);
      n_fast++;
      // non-critical activity early in the cycle
      repeat (N_BG) begin
        int unsigned idx;
        do idx = $urandom % N_TD; while (idx == fast_idx || idx inside {chain_idx});
        toggle_at(idx, time'(1000 + $urandom % (T - 12_000)));
      end
    end
  end

  initial begin
    int unsigned n_ones;
    clk_in    = 1'b0;
    crit_node = '0;
    dly_code  = CODE_W'(31);          // 5 ones: 1.5 ns
    // distinct random slots for the critical-path gates
    begin
      int unsigned base = $urandom % N_TD;
      foreach (chain_idx[i]) chain_idx[i] = (base + i * 137) % N_TD;
    end
    do fast_idx = $urandom % N_TD; while (fast_idx inside {chain_idx});

    // warm-up: let the delay line and the detectors settle
    repeat (3) begin
      #(T/2) clk_in = 1'b1;
      #(T/2) clk_in = 1'b0;
    end
    n_sys = 0;
    host_run = 1'b1;

    for (int c = 0; c < int'(CYCLES); c++) begin
      time t_rise, w_lo, w_hi, t_gate;
      bit  expect_err, must_pulse, may_pulse, stale, close_call;
      int  dly;
      if (c == int'(CYCLES) / 2) dly_code = CODE_W'(511);   // 9 ones: 2.5 ns
      n_ones = $countones(dly_code);
      dly    = int'((n_ones + 1) * STEP);
      if (n_ones == 5) n_set1++; else n_set2++;
      #(T/2);
      err_seen = 1'b0;
      clk_in = 1'b1;
      n_in++;
      t_rise = $time;
      // Reference. A toggle at t gives a detector pulse [t+TDL, t+TDL+TDW).
      // If it overlaps E_DYN [w_lo, w_hi), the first stage discharges at
      // s1 = max(t+TDL, w_lo) and ERROR rises LEVELS*ORD later, provided
      // every stage is reached while E_DYN is still high. The edge is gated
      // when ERROR is up before CLK_DEL rises at t_gate.
      w_lo   = t_rise + GATE;
      w_hi   = t_rise + time'(dly) + GATE;
      t_gate = t_rise + time'(dly);
      expect_err = 1'b0;
      must_pulse = 1'b0;
      may_pulse  = 1'b0;
      close_call = 1'b0;
      foreach (toggles[i]) begin
        time on, off, s1;
        on  = toggles[i] + TDL;
        off = on + TDW;
        if (on < w_hi && off > w_lo) begin
          s1 = (on > w_lo) ? on : w_lo;
          if (s1 + LEVELS * ORD < t_gate) expect_err = 1'b1;
          if (s1 + LEVELS * ORD + 5 > t_gate && s1 + LEVELS * ORD < t_gate + 5) close_call = 1'b1;
          if (s1 + LEVELS * ORD + 30 < w_hi) must_pulse = 1'b1;
          if (s1 + (LEVELS - 1) * ORD < w_hi + 30) may_pulse = 1'b1;
        end
      end
      while (toggles.size() > 0 && toggles[0] + 2 * T < t_rise) void'(toggles.pop_front());
      #(dly - 10);
      stale = (endpoint != src_q);   // what a register would capture now
      #(60);
      if (must_pulse) check(err_seen, "ERROR pulse missing");
      if (!may_pulse) check(!err_seen, "ERROR pulse without late activity");
      // A race within 5 ps of the clock-gate latch closing is not judged;
      // the cycle count below then uses what the gate did.
      if (close_call) begin
        n_close++;
        expect_err = !clk_sys;
      end
      check(clk_sys == !expect_err, $sformatf("CLK_SYS=%0b, reference %0b", clk_sys, !expect_err));
      check(!(stale && !expect_err), "late endpoint not detected");
      if (expect_err) n_err++; else n_clean++;
      if (stale && err_seen) n_late_caught++;
      if (stale && err_seen && !clk_sys) n_prevented++;
      #(T/2 - dly - 50);
      clk_in = 1'b0;
    end
    #(T);

    // throughput: one CLK_IN period lost per corrected error
    check(n_sys == n_in - n_err,
          $sformatf("CLK_SYS pulses %0d, expected %0d - %0d", n_sys, n_in, n_err));
    check(n_err > 0,         "no correction happened");
    check(n_late_caught > 0, "no late arrival was caught");
    check(n_prevented > 0,   "no stale capture was prevented");
    check(n_fast > 0,        "no fast-path toggle happened");
    check(n_clean > 0,       "no clean cycle happened");
    check(n_set1 > 0 && n_set2 > 0, "both delay settings must be used");
    $display("cycles=%0d sys_pulses=%0d corrected=%0d late_paths=%0d late_caught=%0d prevented=%0d fast_toggles=%0d clean=%0d",
             n_in, n_sys, n_err, n_late, n_late_caught, n_prevented, n_fast, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
