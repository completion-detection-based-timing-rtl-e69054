// tb_edyn_pulse_gen -- self-checking testbench for the programmable delay
// and E_DYN pulse generator.
//
// For each of the 16 thermometer settings (n = 0..15 ones) runs several
// 20 ns clock cycles and measures with timestamps: the CLK_DEL rising and
// falling delays, which must be (n + 1) * 250 ps, i.e. 0.25 ns to 4 ns; the
// E_DYN pulse start (gate delay after CLK_IN rises), its width (equal to the
// programmed delay) and that there is exactly one E_DYN pulse per cycle,
// none at the falling clock edge.
module tb_edyn_pulse_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T       = 20_000;
  localparam int unsigned STEP    = 250;
  localparam int unsigned GATE    = 20;
  localparam int unsigned CODE_W  = 15;

  logic              clk_in;
  logic [CODE_W-1:0] code;
  logic              clk_del;
  logic              e_dyn;
  int                checks = 0;
  int                failures = 0;

  time t_in_r, t_in_f, t_del_r, t_del_f, t_e_r, t_e_f;
  int  n_e_pulses;

  edyn_pulse_gen #(.STEP_PS(STEP), .CODE_W(CODE_W), .GATE_PS(GATE)) dut (
    .clk_in(clk_in), .dly_code(code), .clk_del(clk_del), .e_dyn(e_dyn)
  );

  always @(posedge clk_in)  t_in_r  = $time;
  always @(negedge clk_in)  t_in_f  = $time;
  always @(posedge clk_del) t_del_r = $time;
  always @(negedge clk_del) t_del_f = $time;
  always @(posedge e_dyn) begin t_e_r = $time; n_e_pulses++; end
  always @(negedge e_dyn)   t_e_f   = $time;

  task automatic check_eq(input longint got, input longint exp, input string what, input int n);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (n=%0d): got %0d ps expected %0d ps", what, n, got, exp);
    end
  endtask

  initial begin
    #(100 * 16 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_in = 1'b0;
    code   = '0;
    n_e_pulses = 0;
    // settle the delay line
    repeat (2) begin #(T/2) clk_in = 1'b1; #(T/2) clk_in = 1'b0; end
    #(T/2);
    for (int n = 0; n <= int'(CODE_W); n++) begin
      longint d;
      code = CODE_W'((1 << n) - 1);
      d = longint'((n + 1) * STEP);
      #(T/2);
      repeat (3) begin
        n_e_pulses = 0;
        clk_in = 1'b1;
        #(T/2) clk_in = 1'b0;
        #(T/2 - 1);
        check_eq(t_del_r - t_in_r, d, "CLK_DEL rising delay", n);
        check_eq(t_del_f - t_in_f, d, "CLK_DEL falling delay", n);
        check_eq(t_e_r - t_in_r, GATE, "E_DYN start after CLK_IN", n);
        check_eq(t_e_f - t_e_r, d, "E_DYN width", n);
        check_eq(t_e_f - t_del_r, GATE, "E_DYN end after CLK_DEL", n);
        check_eq(n_e_pulses, 1, "E_DYN pulses per cycle", n);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
