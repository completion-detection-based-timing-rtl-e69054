// tb_td_cell -- self-checking testbench for the transition detector model.
//
// Toggles the monitored input with rising and falling edges at random
// spacings and with a pulse shorter than the internal delay, and checks the
// detector output at fixed times after each edge: still low before the
// latency has passed, high after it for the pulse width, low again
// afterwards and while the input is stable.
module tb_td_cell;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned D = 500;
  localparam int unsigned L = 400;

  logic a;
  logic td_out;
  int   checks = 0;
  int   failures = 0;

  td_cell #(.DELAY_PS(D), .LATENCY_PS(L)) dut (.a(a), .td_out(td_out));

  task automatic expect_out(input logic exp, input string what);
    checks++;
    if (td_out !== exp) begin
      failures++;
      $display("FAIL %s at %0t: td_out=%0b expected %0b", what, $time, td_out, exp);
    end
  endtask

  initial begin
    #(200_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0;
    #(2 * D);
    expect_out(1'b0, "idle low");
    for (int k = 0; k < 20; k++) begin
      int unsigned hold;
      a = !a;                         // edge
      #(L - 10) expect_out(1'b0, "before latency");
      #20       expect_out(1'b1, "just after latency");
      #(D - 20) expect_out(1'b1, "end of pulse");
      #20       expect_out(1'b0, "after pulse");
      hold = 2 * D + L + ($urandom % (3 * D));
      #(hold - L - D - 10);
      expect_out(1'b0, "input stable");
    end
    // A glitch shorter than the internal delay is still flagged, and the
    // activity is over once the delayed copy has caught up.
    a = !a; #(250) a = !a;
    #(L - 150) expect_out(1'b1, "during glitch activity");
    #(700)     expect_out(1'b0, "after glitch activity");
    #(2 * D)   expect_out(1'b0, "idle after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
