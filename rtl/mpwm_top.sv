// Multi-step pulse-width modulator (MPWM): transmitter side of an
// inductively coupled gate-driver signal isolator.
//
// The PWM command switches a 100 MHz oscillator on and off (on-off
// keying).  Instead of driving the transformer with the full oscillator
// half-period, every rising edge of the carrier V_MOD launches four
// back-to-back narrow pulses PUL[0..3] of width
//     w = 1.025 ns + 150 ps * V_PWD .
// PUL[0] and PUL[2] are merged onto the high primary terminal V_MOD(H),
// PUL[1] and PUL[3] onto the low terminal V_MOD(L), so the primary sees a
// short differential burst and the magnetising current has no time to
// build up.  A closed loop watches the peak of the V_MOD(H) node and
// steps V_PWD by one every eight carrier cycles: down while the peak
// exceeds V_REF, up while it stays below, settling at the narrowest width
// that still delivers enough signal.
//
// Ports: v_pwm (PWM command), rst (asynchronous, active high; clears the
// code to 0 and both dividers), v_node_h (analogue voltage of the V_MOD(H)
// transformer node, fed back from the external magnetics), v_ref
// (threshold); outputs v_mod_h / v_mod_l (logic drive of the two primary
// terminals, before the output buffers), v_pwd (current code), and v_mod,
// v_up_dn for observation.
//
// The structure follows the design description.  The output buffers, the
// transformer and the receiver are outside this module; merging the
// pulses with a logical OR is this design's reading of the description.
`timescale 1ps/1ps
module mpwm_top
  import mpwm_pkg::*;
#(
  parameter int unsigned OSC_PS  = OSC_PERIOD_PS,
  parameter int unsigned TAP_PS  = TAP_DELAY_PS,
  parameter int unsigned PATH_PS = PATH_DELAY_PS,
  parameter int unsigned RATIO   = DIV_RATIO
) (
  input  logic v_pwm,
  input  logic rst,
  input  real  v_node_h,
  input  real  v_ref,
  output logic v_mod_h,
  output logic v_mod_l,
  output pwd_t v_pwd,
  output logic v_mod,
  output logic v_up_dn
);
  logic [N_STAGES-1:0] pul;
  logic                v_fall, v_ck_ud;   // loop internals, kept for probing
  real                 v_fb;

  mpwm_vco_ook #(.PERIOD_PS(OSC_PS)) u_vco (.v_pwm(v_pwm), .v_mod(v_mod));

  mpwm_pulse_gen #(.TAP_PS(TAP_PS), .PATH_PS(PATH_PS)) u_pgen (
    .v_mod(v_mod), .v_pwd(v_pwd), .pul(pul)
  );

  // Differential merge: even pulses to the high terminal, odd to the low.
  always_comb begin
    v_mod_h = pul[0] | pul[2];
    v_mod_l = pul[1] | pul[3];
  end

  mpwm_feedback #(.RATIO(RATIO)) u_fb (
    .v_mod   (v_mod),
    .pul     (pul),
    .rst     (rst),
    .v_node_h(v_node_h),
    .v_ref   (v_ref),
    .v_pwd   (v_pwd),
    .v_up_dn (v_up_dn),
    .v_fall  (v_fall),
    .v_ck_ud (v_ck_ud),
    .v_fb    (v_fb)
  );
endmodule
