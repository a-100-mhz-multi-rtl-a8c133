// Behavioural model of one delay buffer (not synthesizable as a delay).
//
// A buffer of the delay line in each pulse stage, or the fixed delay of the
// selected path.  The output follows the input after DELAY_PS picoseconds;
// the delay is inertial, so input pulses shorter than DELAY_PS are
// swallowed, as a real buffer would.  The 150 ps default is the width step
// per code of the design; in silicon the value comes from the buffer
// sizing and is not a parameter.  Synthesis sees a plain buffer.
`timescale 1ps/1ps
module mpwm_delay_cell #(
  parameter int unsigned DELAY_PS = 150
) (
  input  logic a,
  output logic y
);
  assign #(DELAY_PS) y = a;
endmodule
