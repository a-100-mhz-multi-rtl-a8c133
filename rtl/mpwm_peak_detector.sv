// Behavioural model of the peak detector that makes V_FB (analogue, not
// synthesizable).
//
// In silicon a diode charges a hold capacitor from the V_MOD(H) transformer
// node and a switch discharges it.  Here v_fb follows the highest value of
// v_in minus the diode drop V_F since the last clear, never below 0 V, and
// is forced to 0 V while clr is high.  The model re-evaluates on every
// change of v_in or clr; leakage of the hold capacitor is not modelled.
// The hold is written as a latch on purpose: the hold capacitor is a
// storage element that is updated whenever the input exceeds it.
// The diode, hold capacitor and discharge switch follow the design
// description; the 0.3 V drop and the ideal hold are this design's own
// choices.
`timescale 1ps/1ps
module mpwm_peak_detector #(
  parameter real V_F = 0.3
) (
  input  real  v_in,
  input  logic clr,
  output real  v_fb
);
  always_latch begin
    if (clr)                    v_fb = 0.0;
    else if (v_in - V_F > v_fb) v_fb = v_in - V_F;
  end
endmodule
