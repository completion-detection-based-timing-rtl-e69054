// tb_dyn_or_tree -- self-checking testbench for the 3-stage dynamic OR tree.
//
// Drives every one of the 1000 input slots alone, then random sparse
// patterns, each inside an evaluation pulse, and checks ERROR against the OR
// of the pattern after the three stage delays. Also checks: ERROR is 0
// while precharging; a detector pulse that ends inside the evaluation pulse
// is still caught; a pulse that falls entirely in the precharge phase is
// not; and an evaluation pulse shorter than the tree's depth in gate delays
// never produces ERROR, which is why the pulse width must be tuned.
module tb_dyn_or_tree;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned FANIN  = 10;
  localparam int unsigned LEVELS = 3;
  localparam int unsigned N      = FANIN ** LEVELS;
  localparam int unsigned D      = 400;
  localparam int unsigned TPROP  = LEVELS * D;

  logic         e_dyn;
  logic [N-1:0] td;
  logic         error;
  int           checks = 0;
  int           failures = 0;

  dyn_or_tree #(.FANIN(FANIN), .LEVELS(LEVELS), .DELAY_PS(D)) dut (
    .e_dyn(e_dyn), .td_out(td), .error(error)
  );

  task automatic expect_err(input logic exp, input string what, input int idx);
    checks++;
    if (error !== exp) begin
      failures++;
      $display("FAIL %s (slot %0d) at %0t: error=%0b expected %0b", what, idx, $time, error, exp);
    end
  endtask

  task automatic eval_pattern(input logic [N-1:0] pat, input string what, input int idx);
    e_dyn = 1'b0; td = pat;
    #(TPROP + 10) expect_err(1'b0, {what, ", precharge"}, idx);
    e_dyn = 1'b1;
    #(TPROP - 10) expect_err(1'b0, {what, ", before tree delay"}, idx);
    #20           expect_err(|pat, what, idx);
    e_dyn = 1'b0; td = '0;
    #(D + 10)     expect_err(1'b0, {what, ", cleared"}, idx);
  endtask

  initial begin
    #(100_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_dyn = 1'b0;
    td    = '0;
    #(TPROP);
    eval_pattern('0, "all quiet", -1);
    for (int i = 0; i < int'(N); i++) begin
      logic [N-1:0] pat;
      pat = '0;
      pat[i] = 1'b1;
      eval_pattern(pat, "single slot", i);
    end
    for (int k = 0; k < 200; k++) begin
      logic [N-1:0] pat;
      int           idx;
      pat = '0;
      idx = -1;
      if ($urandom % 4 != 0) begin
        repeat (1 + $urandom % 5) begin
          idx = int'($urandom % N);
          pat[idx] = 1'b1;
        end
      end
      eval_pattern(pat, "random pattern", idx);
    end
    begin
      int i = int'($urandom % N);
      // A detector pulse that ends during evaluation is held by the tree.
      e_dyn = 1'b1; td[i] = 1'b1;
      #100 td[i] = 1'b0;
      #(TPROP) expect_err(1'b1, "pulse ended during evaluation", i);
      e_dyn = 1'b0;
      #(D + 10) expect_err(1'b0, "cleared by precharge", i);
      // A pulse entirely within the precharge phase is not seen.
      td[i] = 1'b1;
      #100 td[i] = 1'b0;
      #10 e_dyn = 1'b1;
      #(TPROP + 10) expect_err(1'b0, "pulse before evaluation", i);
      e_dyn = 1'b0;
      #(TPROP + 10);
      // An evaluation pulse of 1.5 gate delays cannot get through 3 stages.
      td[i] = 1'b1;
      e_dyn = 1'b1;
      repeat (3) #(D / 2) expect_err(1'b0, "short pulse, during", i);
      e_dyn = 1'b0;
      repeat (6) #(D / 2) expect_err(1'b0, "short pulse, after", i);
      td[i] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
