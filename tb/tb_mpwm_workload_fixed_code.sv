// Workload testbench: the modulator's output at a fixed pulse-width code,
// under the evaluation conditions of the design (PWM command 1 MHz, 50 %;
// carrier 100 MHz, 50 %), for code 0000 (narrowest) and code 1011.
//
// The gated oscillator drives the four-stage pulse generator directly, so
// the code is held constant instead of being set by the loop.  For each
// code the testbench runs four PWM periods and measures, per 500 ns burst,
// how many pulses appear on V_MOD(H) and V_MOD(L) and for how long each
// terminal is driven.  Expected: 50 carrier cycles per burst, two pulses per
// cycle per terminal, and 2 * 50 * w of drive time per terminal, with
// w = 1025 ps + 150 ps * code.  The drive time and the pulse width are
// what set the magnetising current of the transformer; the current itself
// is an analogue quantity and is not computed here.
`timescale 1ps/1ps
module tb_mpwm_workload_fixed_code;
  import mpwm_pkg::*;
  logic v_pwm = 1'b0, v_mod;
  pwd_t code = '0;
  logic [3:0] pul;
  logic v_mod_h, v_mod_l;
  int checks = 0, failures = 0;
  int  n_h = 0, n_l = 0;
  longint t_on_h = 0, t_on_l = 0;
  time t_hr = 0, t_lr = 0;

  mpwm_vco_ook   u_vco  (.v_pwm(v_pwm), .v_mod(v_mod));
  mpwm_pulse_gen u_pgen (.v_mod(v_mod), .v_pwd(code), .pul(pul));

  always_comb begin
    v_mod_h = pul[0] | pul[2];
    v_mod_l = pul[1] | pul[3];
  end

  always @(posedge v_mod_h) t_hr = $time;
  always @(negedge v_mod_h) begin n_h++; t_on_h += longint'($time - t_hr); end
  always @(posedge v_mod_l) t_lr = $time;
  always @(negedge v_mod_l) begin n_l++; t_on_l += longint'($time - t_lr); end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL code=%0d %s (t=%0t)", code, what, $time);
    end
  endtask

  task automatic run_code(pwd_t c);
    longint w;
    code = c;
    w = 1025 + 150 * longint'(c);
    #100_000;
    for (int p = 0; p < 4; p++) begin
      n_h = 0; n_l = 0; t_on_h = 0; t_on_l = 0;
      v_pwm = 1'b1;
      #500_000 v_pwm = 1'b0;
      #500_000;
      check(n_h == 100 && n_l == 100, $sformatf("pulses per burst H %0d L %0d", n_h, n_l));
      check(t_on_h == 100 * w, $sformatf("V_MOD(H) drive time %0d ps", t_on_h));
      check(t_on_l == 100 * w, $sformatf("V_MOD(L) drive time %0d ps", t_on_l));
    end
    $display("code %0d: pulse %0d ps, drive per terminal per burst %0d ps of 500000 ps",
             c, w, t_on_h);
  endtask

  initial begin
    #10_000;
    run_code(4'b0000);
    run_code(4'b1011);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
