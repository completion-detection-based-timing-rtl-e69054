// tb_dyn_or -- self-checking testbench for the dynamic OR gate.
//
// For random input patterns checks: output 0 during precharge whatever the
// inputs; output equal to the OR of the inputs one gate delay into the
// evaluation and not before; once an input has discharged the node, output
// stays 1 until the next precharge even when that input falls again; 0
// during evaluation with all inputs low; and the output returns to 0 one
// gate delay after the precharge starts.
module tb_dyn_or;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 10;
  localparam int unsigned D = 400;

  logic         e_dyn;
  logic [W-1:0] in;
  logic         out;
  int           checks = 0;
  int           failures = 0;

  dyn_or #(.FANIN(W), .DELAY_PS(D)) dut (.e_dyn(e_dyn), .in(in), .out(out));

  task automatic expect_out(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s at %0t: in=%b e=%0b out=%0b expected %0b", what, $time, in, e_dyn, out, exp);
    end
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
    in    = '0;
    #(D + 10) expect_out(1'b0, "precharge, inputs low");
    for (int k = 0; k < 500; k++) begin
      logic [W-1:0] pat;
      // one-hot, empty or random pattern
      case ($urandom % 3)
        0: pat = W'(1) << ($urandom % W);
        1: pat = '0;
        default: pat = W'($urandom);
      endcase
      // precharge with the pattern present
      e_dyn = 1'b0; in = pat;
      #(D + 10) expect_out(1'b0, "precharge");
      // evaluate
      e_dyn = 1'b1;
      #(D - 10) expect_out(1'b0, "before the gate delay");
      #20       expect_out(|pat, "evaluate");
      // inputs fall during evaluation: keeper holds the result
      in = '0;
      #(D + 10) expect_out(|pat, "hold after inputs fall");
      // an input rising late in the evaluation still discharges the node
      if (pat == '0 && ($urandom % 2)) begin
        in[$urandom % W] = 1'b1;
        #(D + 10) expect_out(1'b1, "late input during evaluation");
        in = '0;
        #(D + 10) expect_out(1'b1, "hold after late input");
      end
      e_dyn = 1'b0;
      #(D + 10) expect_out(1'b0, "back to precharge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
