// End-to-end testbench of mpwm_top at its default parameters.
//
// A 1 MHz, 50 % PWM command switches the 100 MHz carrier on and off; the
// V_MOD(H) output drives a first-order model of the transformer node whose
// voltage is fed back to the loop.  V_REF is stepped through four values:
//   0.9 V : the loop settles where the node peak minus the 0.3 V diode
//           drop just crosses V_REF (the code dithers just below the
//           predicted crossing code; one extra step is allowed for the
//           numerical model);
//   1.6 V : unreachable, the code climbs to 15 and saturates;
//   1.2 V : reachable only near the widest codes, the code stays high;
//   0.9 V : settles again, now from above;
//   0.2 V : always exceeded, the code falls to 0 and saturates.
// Checked throughout: every V_MOD(H) and V_MOD(L) pulse is
// 1025 ps + 150 ps * code wide; each V_MOD(L) pulse starts exactly when a
// V_MOD(H) pulse ends; two pulses per carrier cycle on each output; the
// code moves by one step, only on every 8th carrier cycle, and never while
// the PWM command is low.  Each mechanism (up step, down step, saturation
// at 15 and at 0, settling, PWM-off freeze) is counted and must occur.
`timescale 1ps/1ps
module tb_mpwm_top;
  import mpwm_pkg::*;
  logic v_pwm = 1'b0, rst = 1'b0;
  real  v_node, v_ref = 0.9;
  logic v_mod_h, v_mod_l, v_mod, v_up_dn;
  pwd_t v_pwd, prev_code;
  int checks = 0, failures = 0;

  int   n_carrier = 0, n_h = 0, n_l = 0, n_skip = 0;
  time  t_h_rise = 0, t_h_fall = 0, t_l_rise = 0, t_change = 0;
  int   n_up = 0, n_down = 0, n_sat_hi = 0, n_sat_lo = 0, n_settled = 0, n_frozen = 0;

  mpwm_top dut (
    .v_pwm(v_pwm), .rst(rst), .v_node_h(v_node), .v_ref(v_ref),
    .v_mod_h(v_mod_h), .v_mod_l(v_mod_l), .v_pwd(v_pwd), .v_mod(v_mod), .v_up_dn(v_up_dn)
  );

  mpwm_tb_channel u_ch (.drive(v_mod_h), .v(v_node));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t, code=%0d)", what, $time, v_pwd);
    end
  endtask

  function automatic int unsigned width_of(pwd_t c);
    return 1025 + 150 * int'(c);
  endfunction

  // Predicted node peak for a code, in the periodic steady state (exact
  // exponentials; the channel model integrates with Euler steps): PUL[0]
  // charges from what is left of the previous cycle, the node decays during
  // PUL[1], charges again during PUL[2] and decays for the rest of the
  // 10 ns cycle.
  function automatic real peak_of(int c);
    real w = real'(1025 + 150 * c);
    real a = $exp(-w / 2000.0);
    real r = $exp(-(10000.0 - 3.0 * w) / 2000.0);
    real v0 = 0.0, p0 = 0.0, p2 = 0.0;
    for (int k = 0; k < 20; k++) begin
      p0 = 1.8 - (1.8 - v0) * a;
      p2 = 1.8 - (1.8 - p0 * a) * a;
      v0 = p2 * r;
    end
    // At wide codes little of the last cycle has decayed and PUL[0] peaks
    // higher than PUL[2].
    return (p0 > p2) ? p0 : p2;
  endfunction

  // Smallest code whose V_FB exceeds V_REF: the loop dithers just below it.
  function automatic int eq_code(real vref);
    for (int c = 0; c < 16; c++) if (peak_of(c) - 0.3 > vref) return c;
    return 16;
  endfunction

  always @(posedge v_mod) n_carrier++;

  always @(posedge v_mod_h) t_h_rise = $time;
  always @(negedge v_mod_h) begin
    t_h_fall = $time;
    n_h++;
    if (t_h_rise > t_change + 1000)
      check($time - t_h_rise == width_of(v_pwd),
            $sformatf("V_MOD(H) width %0d", $time - t_h_rise));
    else n_skip++;
  end
  always @(posedge v_mod_l) begin
    t_l_rise = $time;
    check(t_l_rise == t_h_fall, "V_MOD(L) pulse follows V_MOD(H) pulse");
  end
  always @(negedge v_mod_l) begin
    n_l++;
    if (t_l_rise > t_change + 1000)
      check($time - t_l_rise == width_of(v_pwd),
            $sformatf("V_MOD(L) width %0d", $time - t_l_rise));
  end

  always @(v_pwd) if (!rst && $time > 10) begin
    t_change = $time;
    check(v_pwm || v_mod, "code moves only while the carrier runs");
    check(n_carrier % 8 == 0, $sformatf("code moves on carrier cycle %0d", n_carrier));
    check(v_pwd == prev_code + 1 || v_pwd == prev_code - 1, "single step");
    if (v_pwd == prev_code + 1) n_up++; else n_down++;
    prev_code = v_pwd;
  end

  // One PWM period: 500 ns on, 500 ns off.
  task automatic pwm_period();
    pwd_t c_off;
    v_pwm = 1'b1;
    #500_000 v_pwm = 1'b0;
    #20_000 c_off = v_pwd;
    #480_000;
    if (v_pwd == c_off) n_frozen++;
    check(v_pwd == c_off, "code frozen while PWM is low");
  endtask

  task automatic settle(real vref, int periods);
    int ce;
    v_ref = vref;
    ce = eq_code(vref);
    for (int p = 0; p < periods; p++) begin
      pwm_period();
      if (p >= periods - 2) begin
        check(int'(v_pwd) >= ce - 2 && int'(v_pwd) <= ce,
              $sformatf("settled code %0d, predicted %0d", v_pwd, ce));
        n_settled++;
      end
    end
    $display("V_REF=%0.2f: code %0d (predicted threshold code %0d)", vref, v_pwd, ce);
  endtask

  // Asynchronous reset needs an edge: raise it just after time 0.
  initial #1 rst = 1'b1;

  initial begin
    prev_code = '0;
    #5000 rst = 1'b0;
    #5000;
    n_h = 0;   // forget start-up events from the random initial state
    n_l = 0;
    n_carrier = 0;
    check(v_pwd == 4'd0, "reset code");
    settle(0.9, 5);
    settle(1.6, 4);
    check(v_pwd == 4'd15, "saturated at 15");
    pwm_period();
    if (v_pwd == 4'd15) n_sat_hi++;
    check(v_pwd == 4'd15, "held at 15");
    settle(1.2, 3);
    settle(0.9, 5);
    settle(0.2, 4);
    check(v_pwd == 4'd0, "saturated at 0");
    pwm_period();
    if (v_pwd == 4'd0) n_sat_lo++;
    check(v_pwd == 4'd0, "held at 0");
    check(n_h == 2 * n_carrier && n_l == 2 * n_carrier,
          $sformatf("two pulses per cycle on each side (%0d cycles, H %0d, L %0d)", n_carrier, n_h, n_l));
    $display("mechanisms: up=%0d down=%0d sat15=%0d sat0=%0d settled=%0d frozen=%0d skipped_widths=%0d",
             n_up, n_down, n_sat_hi, n_sat_lo, n_settled, n_frozen, n_skip);
    check(n_up > 0,      "up steps happened");
    check(n_down > 0,    "down steps happened");
    check(n_sat_hi > 0,  "saturation at 15 happened");
    check(n_sat_lo > 0,  "saturation at 0 happened");
    check(n_settled > 0, "settling happened");
    check(n_frozen > 0,  "PWM-off freeze happened");
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
