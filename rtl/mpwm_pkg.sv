// Shared constants of the multi-step pulse-width modulator (MPWM).
//
// The modulator chops each oscillator cycle into four back-to-back narrow
// pulses whose common width is set by a 4-bit code.  These constants size
// that code, the delay line that realises it, the two divide-by-8 dividers
// of the control loop and the analogue timing used by the behavioural
// models.  Widths, tap count, stage count, divide ratio, the 150 ps step,
// the 1.025 ns minimum width and the 100 MHz oscillator all follow the
// design description; the split of the minimum width between the mux path
// and the first tap is this design's own choice.
`timescale 1ps/1ps
package mpwm_pkg;
  localparam int unsigned CODE_W        = 4;      // V_PWD[3:0]
  localparam int unsigned N_TAPS        = 16;     // buffers in each delay chain
  localparam int unsigned N_STAGES      = 4;      // PULSE GEN.[0..3]
  localparam int unsigned DIV_RATIO     = 8;      // both loop dividers
  localparam int unsigned TAP_DELAY_PS  = 150;    // width step per code
  localparam int unsigned MIN_WIDTH_PS  = 1025;   // pulse width at code 0
  // Fixed delay of the selected path outside the chain (mux, inverter,
  // AND): MIN_WIDTH_PS minus one tap.
  localparam int unsigned PATH_DELAY_PS = MIN_WIDTH_PS - TAP_DELAY_PS;
  localparam int unsigned OSC_PERIOD_PS = 10000;  // 100 MHz

  typedef logic [CODE_W-1:0] pwd_t;

  // Width of every PUL[x] pulse for a given code, in picoseconds.
  function automatic int unsigned pulse_width_ps(pwd_t code);
    return MIN_WIDTH_PS + TAP_DELAY_PS * int'(code);
  endfunction
endpackage
