// tb_edyn_width_sweep -- finds the minimum safe E_DYN pulse width.
//
// The E_DYN width is shrunk setting by setting, from 4 ns down to 0.25 ns,
// until the error detection fails, and the smallest width at which it
// still works is reported. At each setting a behavioural critical path
// (17 monitored gates 0.5 ns apart, 0.4 ns more to the endpoint, all on
// detector slots of the full-size top) is launched with the endpoint
// arriving 0.05 ns to 6 ns too late, on a grid of 40 arrival times. Each
// launch is followed by an idle cycle. A launch "escapes" when the endpoint
// register captures a stale value, i.e. a timing error got through.
//
// Expected result, worked out from the cell delays: a toggle is corrected
// when its detector pulse reaches the tree while E_DYN is high and early
// enough for three OR stages (3 x 0.4 ns) to raise ERROR before CLK_DEL
// rises. E_DYN starts 0.02 ns after CLK_IN, so a width below 1.22 ns catches
// nothing at all. Above it, the caught toggle times form a window
// (width - 0.72 ns) wide, wider than the 0.5 ns gate spacing, so every late
// path is caught. The minimum safe width is therefore 1.25 ns (setting
// n = 4). The testbench checks that no launch escapes at n >= 4, that
// launches do escape at every n < 4, and that every corrected error costs
// exactly one clock period.
module tb_edyn_width_sweep;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_TD   = 1000;
  localparam int unsigned CODE_W = 15;
  localparam int unsigned T      = 50_000;
  localparam int unsigned STEP   = 250;
  localparam int unsigned K      = 17;
  localparam int unsigned S      = 500;
  localparam int unsigned TAIL   = 400;
  localparam int unsigned N_A    = 40;       // arrival times per setting
  localparam int unsigned N_EXP  = 4;        // expected minimum safe setting

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
  int n_in = 0, n_sys = 0;

  int unsigned src_q = 0;
  int unsigned endpoint = 0;
  int unsigned chain_idx [K];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Free-running root clock.
  initial begin
    clk_in = 1'b0;
    forever begin
      #(T/2) clk_in = 1'b1;
      n_in++;
      #(T/2) clk_in = 1'b0;
    end
  end

  always @(posedge clk_sys) n_sys++;

  initial begin
    #(time'(16 * N_A * 3 + 20) * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int escapes [CODE_W+1];
    int min_safe;
    begin
      int unsigned base = $urandom % N_TD;
      foreach (chain_idx[i]) chain_idx[i] = (base + i * 101) % N_TD;
    end
    crit_node = '0;
    dly_code  = '1;
    repeat (3) @(posedge clk_sys);
    min_safe = -1;
    for (int n = int'(CODE_W); n >= 0; n--) begin
      int in0, sys0;
      // change the setting while the clock is low
      @(negedge clk_in);
      dly_code = CODE_W'((1 << n) - 1);
      @(posedge clk_sys);
      in0 = n_in; sys0 = n_sys;
      escapes[n] = 0;
      for (int j = 0; j < int'(N_A); j++) begin
        int  a;
        time d;
        // launch edge (the current one)
        a = 50 + j * 150;
        src_q++;
        d = time'(int'(T) - int'((K - 1) * S + TAIL) + a);
        for (int i = 0; i < int'(K); i++) begin
          fork
            automatic int unsigned idx = chain_idx[i];
            automatic time         dt  = d + time'(i * S);
            begin
              #(dt);
              crit_node[idx] = !crit_node[idx];
            end
          join_none
        end
        fork
          automatic int unsigned v  = src_q;
          automatic time         da = d + (K - 1) * S + TAIL;
          begin
            #(da);
            endpoint = v;
          end
        join_none
        // capture edge
        @(posedge clk_sys);
        if (endpoint != src_q) escapes[n]++;
        // idle cycle: no launch, the path settles
        @(posedge clk_sys);
      end
      // cycle accounting for this setting: every CLK_IN edge either gave a
      // CLK_SYS edge or was gated by a detected error (at most one per launch)
      check(n_sys - sys0 == 2 * int'(N_A), "CLK_SYS edges per setting");
      check(n_in - in0 >= 2 * int'(N_A) && n_in - in0 <= 3 * int'(N_A),
            $sformatf("CLK_IN edges per setting: %0d", n_in - in0));
      $display("setting n=%0d  E_DYN width %0d ps  escapes %0d of %0d  gated edges %0d",
               n, (n + 1) * int'(STEP), escapes[n], N_A, (n_in - in0) - (n_sys - sys0));
      if (n >= int'(N_EXP)) check(escapes[n] == 0, $sformatf("timing error escaped at n=%0d", n));
      else                  check(escapes[n] > 0,  $sformatf("no escape at n=%0d, below the expected minimum", n));
      if (escapes[n] == 0 && (min_safe < 0 || min_safe == n + 1)) min_safe = n;
      // late launches at wide settings are caught: at least one gated edge
      if (n >= int'(N_EXP)) check((n_in - in0) - (n_sys - sys0) >= int'(N_A), "every late launch must be gated");
    end
    check(min_safe == int'(N_EXP), $sformatf("minimum safe setting %0d, expected %0d", min_safe, N_EXP));
    $display("minimum safe E_DYN width: %0d ps", (min_safe + 1) * int'(STEP));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
