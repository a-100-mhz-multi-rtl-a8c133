// Edge detector: a short pulse on each rising (FALLING=0) or falling
// (FALLING=1) edge of its input.
//
// Built like the modulator's pulse stages from two delay cells: a1 lags the
// input by the propagation delay DELAY_PS, a2 lags a1 by WIDTH_PS, and
//     rising : pulse = a1 & ~a2
//     falling: pulse = ~a1 & a2
// so the pulse starts DELAY_PS after the edge and lasts WIDTH_PS.  The loop uses one
// falling-edge detector to make the counter clock V_FALL, one to discharge
// the peak detector and one rising-edge detector to make the DFF clock
// V_CK_UD.  Only the function (falling/rising edge detection) is given by
// the design description; the delay-and-gate structure, the 100 ps
// propagation delay and the 200 ps width are this design's own choices.
// The propagation delay matters in the loop: it lets the comparator decide
// before V_CK_UD samples it.  Input pulses must be longer than
// WIDTH_PS.
`timescale 1ps/1ps
module mpwm_edge_detector #(
  parameter bit          FALLING  = 1'b0,
  parameter int unsigned DELAY_PS = 100,
  parameter int unsigned WIDTH_PS = 200
) (
  input  logic a,
  output logic pulse
);
  logic a1, a2;

  mpwm_delay_cell #(.DELAY_PS(DELAY_PS)) u_prop  (.a(a),  .y(a1));
  mpwm_delay_cell #(.DELAY_PS(WIDTH_PS)) u_width (.a(a1), .y(a2));

  always_comb begin
    if (FALLING) pulse = ~a1 & a2;
    else         pulse = a1 & ~a2;
  end
endmodule
