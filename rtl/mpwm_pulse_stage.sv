// One pulse-generation stage (PULSE GEN.[x]) of the modulator.
//
// An adjustable-delay rising-edge detector.  The trigger input runs down a
// chain of N_TAPS buffers, giving taps D[0..15] that lag it by one to
// sixteen buffer delays.  A 16:1 multiplexer, steered by the 4-bit code
// V_PWD, picks tap D[code]; after the fixed delay of that path it is V_REP.
// The output pulse is  PUL = trig AND NOT V_REP : it rises with the trigger
// and falls when V_REP rises, so its width is
//     MIN_WIDTH_PS + TAP_DELAY_PS * code   (1.025 ns .. 3.275 ns).
// V_REP is handed on as the trigger of the next stage, so the next pulse
// starts exactly when this one ends.
//
// The delay chain, mux, inverter and AND gate follow the design
// description; lumping the delay of mux, inverter and AND into one fixed
// cell of MIN_WIDTH_PS - TAP_DELAY_PS after the mux is this design's own
// modelling choice that makes code 0 give the stated 1.025 ns.  The
// trigger must stay high longer than the selected delay, or the pulse is
// cut short by the trigger's own falling edge.
`timescale 1ps/1ps
module mpwm_pulse_stage
  import mpwm_pkg::*;
#(
  parameter int unsigned TAP_PS  = TAP_DELAY_PS,
  parameter int unsigned PATH_PS = PATH_DELAY_PS
) (
  input  logic              trig,
  input  pwd_t              v_pwd,
  output logic              pul,
  output logic              v_rep,
  output logic [N_TAPS-1:0] taps
);
  logic mux_out;

  // Delay chain: taps[0] lags trig by one buffer, taps[i] by i+1 buffers.
  for (genvar i = 0; i < N_TAPS; i++) begin : g_chain
    if (i == 0) begin : g_first
      mpwm_delay_cell #(.DELAY_PS(TAP_PS)) u_buf (.a(trig), .y(taps[0]));
    end else begin : g_next
      mpwm_delay_cell #(.DELAY_PS(TAP_PS)) u_buf (.a(taps[i-1]), .y(taps[i]));
    end
  end

  // 16:1 multiplexer, select = V_PWD.
  always_comb mux_out = taps[v_pwd];

  // Fixed delay of the selected path (mux, inverter, AND).
  mpwm_delay_cell #(.DELAY_PS(PATH_PS)) u_path (.a(mux_out), .y(v_rep));

  // Rising-edge detector output.
  always_comb pul = trig & ~v_rep;
endmodule
