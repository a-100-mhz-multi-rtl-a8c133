// Behavioural model of the clocked comparator of the control loop
// (analogue, not synthesizable).
//
// On each rising edge of clk (V_CLK) it compares its two inputs and, after
// the decision delay T_DEC_PS, drives out high when v_plus (V_REF) is
// above v_minus (V_FB) and low otherwise; the output then holds until the
// next rising edge.  A high output therefore asks the loop to widen the
// pulses.  The input polarity (V_FB on the inverting, V_REF on the
// non-inverting input) and the V_CLK clock follow the design description;
// the edge it decides on and the 50 ps decision delay are this design's
// own choices.
`timescale 1ps/1ps
module mpwm_comparator #(
  parameter int unsigned T_DEC_PS = 50
) (
  input  logic clk,
  input  real  v_plus,
  input  real  v_minus,
  output logic out
);
  always_ff @(posedge clk) out <= #(T_DEC_PS) (v_plus > v_minus);
endmodule
