// dyn_or_tree -- multi-stage dynamic OR tree that reduces all transition
// detector outputs to a single ERROR bit.
//
// LEVELS stages of FANIN-input dynamic OR gates (dyn_or) are stacked: with the
// default FANIN = 10 and LEVELS = 3 the first stage has 100 gates, the second
// 10 and the last one, giving 1000 input slots. All stages share the same
// evaluation pulse `e_dyn`, so the whole tree is precharged while it is low
// and evaluates in one wave while it is high. Stage sizes and the shared
// evaluation pulse follow the design; the grouping of inputs (slot k goes to
// first-stage gate k/FANIN) is this model's choice. In silicon the groups
// come from placement-driven clustering, which has no logic effect.
//   e_dyn   evaluation pulse
//   td_out  FANIN**LEVELS detector outputs (unused slots tied to 0 by the user)
//   error   1 when any input was 1 during the current evaluation pulse
// Timing: each stage adds DELAY_PS, so an input seen at the start of the
// evaluation pulse reaches `error` LEVELS * DELAY_PS later; the pulse must
// last that long for the tree to work, which is what the programmable E_DYN
// width is tuned for. `error` returns to 0 DELAY_PS after e_dyn falls.
module dyn_or_tree #(
  parameter int unsigned FANIN  = 10,
  parameter int unsigned LEVELS = 3,
  parameter int unsigned DELAY_PS = 400
) (
  input  logic                     e_dyn,
  input  logic [FANIN**LEVELS-1:0] td_out,
  output logic                     error
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_IN = FANIN ** LEVELS;

  // node[l] holds the outputs of stage l-1 (node[0] are the tree inputs);
  // only the low N_IN / FANIN**l bits of node[l] are used.
  logic [N_IN-1:0] node [LEVELS+1];

  assign node[0] = td_out;

  for (genvar l = 0; l < LEVELS; l++) begin : g_stage
    localparam int unsigned NG = N_IN / (FANIN ** (l + 1));
    logic [NG-1:0] stage_out;
    for (genvar g = 0; g < NG; g++) begin : g_gate
      dyn_or #(.FANIN(FANIN), .DELAY_PS(DELAY_PS)) u_or (
        .e_dyn (e_dyn),
        .in    (node[l][g*FANIN +: FANIN]),
        .out   (stage_out[g])
      );
    end
    if (NG < N_IN) begin : g_pad
      assign node[l+1] = {{(N_IN-NG){1'b0}}, stage_out};
    end else begin : g_nopad
      assign node[l+1] = stage_out;
    end
  end

  assign error = node[LEVELS][0];
endmodule
