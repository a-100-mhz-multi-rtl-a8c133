// Behavioural model of the OOK-modulated oscillator that makes V_MOD
// (analogue ring oscillator, not synthesizable).
//
// A ring oscillator gated by the PWM command: the ring node n is the
// inverse of (n AND v_pwm), delayed by half a period, and the output is
// v_mod = v_pwm AND n.  While v_pwm is low the ring rests with n high and
// v_mod low; when v_pwm rises, v_mod rises at once and then toggles every
// PERIOD_PS/2, a 100 MHz square wave of 50 % duty.  When v_pwm falls,
// v_mod drops at once and the cycle in progress is cut short.  This is
// on-off keying of the carrier by the PWM signal.  v_pwm must stay low for
// at least half a period between bursts so the ring can return to rest.
// The 100 MHz frequency and the gating by V_PWM follow the design
// description; the single delayed inverting stage stands for the whole
// ring, and the bias input that tunes the frequency in silicon is not
// modelled (the frequency is a parameter).  The feedback through n is a
// combinational loop on purpose: it is the oscillator.
`timescale 1ps/1ps
module mpwm_vco_ook #(
  parameter int unsigned PERIOD_PS = 10000
) (
  input  logic v_pwm,
  output logic v_mod
);
  logic n;

  assign #(PERIOD_PS / 2) n = ~(n & v_pwm);
  assign v_mod = v_pwm & n;
endmodule
