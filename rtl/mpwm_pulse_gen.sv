// Pulse-generation block: four cascaded pulse stages.
//
// Stage 0 is triggered by the modulated input V_MOD, stage x+1 by the V_REP
// of stage x.  All four share the code V_PWD, so every rising edge of V_MOD
// produces four consecutive pulses PUL[0], PUL[1], PUL[2], PUL[3] of equal
// width w = MIN_WIDTH_PS + TAP_DELAY_PS * code, PUL[x] occupying
// [x*w, (x+1)*w) after the edge.  The cascade of four identical stages
// follows the design description.  Each stage sees a copy of V_MOD delayed
// by x*w, so every pulse is complete as long as V_MOD stays high and low
// for longer than w.  The train lasts 4*w; above code 9 (4*w > 10 ns) it
// runs into the next 100 MHz cycle, so PUL[3] of one cycle overlaps PUL[0]
// of the next.
`timescale 1ps/1ps
module mpwm_pulse_gen
  import mpwm_pkg::*;
#(
  parameter int unsigned TAP_PS  = TAP_DELAY_PS,
  parameter int unsigned PATH_PS = PATH_DELAY_PS
) (
  input  logic                v_mod,
  input  pwd_t                v_pwd,
  output logic [N_STAGES-1:0] pul
);
  logic [N_STAGES:0] trig;   // trig[0] = V_MOD, trig[x+1] = V_REP[x]

  assign trig[0] = v_mod;

  for (genvar x = 0; x < N_STAGES; x++) begin : g_stage
    logic [N_TAPS-1:0] taps_unused;
    mpwm_pulse_stage #(.TAP_PS(TAP_PS), .PATH_PS(PATH_PS)) u_stage (
      .trig (trig[x]),
      .v_pwd(v_pwd),
      .pul  (pul[x]),
      .v_rep(trig[x+1]),
      .taps (taps_unused)
    );
  end
endmodule
