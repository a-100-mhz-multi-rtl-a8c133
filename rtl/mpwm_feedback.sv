// Closed-loop pulse-width control of the modulator.
//
// Sets the 4-bit code V_PWD so that the peak of the V_MOD(H) transformer
// node, held as V_FB, just reaches the threshold V_REF: wide enough pulses
// for a reliable transfer, no wider than that.
//
//   V_MOD --/8--> falling-edge det. --> V_FALL  (counter clock)
//   PUL[2]|PUL[3] --/8--> V_CLK --+--> falling-edge det. --> clears V_FB
//                                 +--> rising-edge det.  --> V_CK_UD
//                                 +--> comparator strobe
//   V_MOD(H) node --peak det.--> V_FB ; comparator(V_REF > V_FB) --DFF--> V_UP/DN
//   V_UP/DN, V_FALL --> 4-bit up/down counter --> V_PWD
//
// Timing, counted in oscillator cycles after reset with both dividers
// reset together: V_CLK rises in cycle 4 (mod 8), after PUL[2]; the
// comparator decides on V_FB and V_CK_UD stores the decision 100 ps later.
// V_CLK falls in cycle 8 (mod 8), clearing V_FB; V_FALL steps the counter
// at the start of cycle 8, before that clear.  So V_UP/DN is set half a
// period before V_FALL, and each decision is made on the peaks of four
// cycles sent with the current code.  The code moves by one step every
// eight oscillator cycles (80 ns at 100 MHz) while the oscillator runs,
// and freezes while the PWM command is low.
//
// The blocks, their connections, both divide-by-8 ratios and the rule
// "V_FB above V_REF: count down; below: count up" follow the design
// description.  Combining PUL[2] and PUL[3] as a logical OR, the common
// reset of both dividers, and the edge-detector delays are this design's
// own choices.
`timescale 1ps/1ps
module mpwm_feedback
  import mpwm_pkg::*;
#(
  parameter int unsigned RATIO = DIV_RATIO
) (
  input  logic                v_mod,
  input  logic [N_STAGES-1:0] pul,
  input  logic                rst,
  input  real                 v_node_h,
  input  real                 v_ref,
  output pwd_t                v_pwd,
  output logic                v_up_dn,
  output logic                v_fall,
  output logic                v_ck_ud,
  output real                 v_fb
);
  logic v_mod_div, pul23, v_clk, fb_clr, cmp_out;

  // Counter clock: falling edge of V_MOD / 8.
  mpwm_divider #(.RATIO(RATIO)) u_div_mod (.clk_in(v_mod), .rst(rst), .clk_out(v_mod_div));
  mpwm_edge_detector #(.FALLING(1'b1)) u_fall (.a(v_mod_div), .pulse(v_fall));

  // Comparator clock: (PUL[2] | PUL[3]) / 8.
  always_comb pul23 = pul[2] | pul[3];
  mpwm_divider #(.RATIO(RATIO)) u_div_clk (.clk_in(pul23), .rst(rst), .clk_out(v_clk));
  mpwm_edge_detector #(.FALLING(1'b1)) u_clr  (.a(v_clk), .pulse(fb_clr));
  mpwm_edge_detector #(.FALLING(1'b0)) u_ckud (.a(v_clk), .pulse(v_ck_ud));

  // Peak of the V_MOD(H) node, compared with V_REF.
  mpwm_peak_detector u_peak (.v_in(v_node_h), .clr(fb_clr), .v_fb(v_fb));
  mpwm_comparator    u_cmp  (.clk(v_clk), .v_plus(v_ref), .v_minus(v_fb), .out(cmp_out));

  // Direction register and code counter.
  mpwm_dir_dff u_dff (.d(cmp_out), .clk(v_ck_ud), .rst(rst), .q(v_up_dn));
  mpwm_updown_counter #(.WIDTH(CODE_W)) u_cnt (
    .v_fall(v_fall), .rst(rst), .v_up_dn(v_up_dn), .v_pwd(v_pwd)
  );
endmodule
