// Direction flip-flop of the control loop.
//
// Samples the comparator decision on the rising edge of V_CK_UD and holds
// it as V_UP/DN for the up/down counter.  V_CK_UD is derived from the
// output pulses and comes well before the counter clock V_FALL, so the
// direction is settled when the counter steps.  The sampling flip-flop and
// its clock follow the design description; the asynchronous reset to 0
// (count down) is this design's own choice.
`timescale 1ps/1ps
module mpwm_dir_dff (
  input  logic d,
  input  logic clk,
  input  logic rst,
  output logic q
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= d;
  end
endmodule
