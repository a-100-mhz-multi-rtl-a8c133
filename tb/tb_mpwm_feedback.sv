// Testbench for mpwm_feedback.  The testbench plays the pulse generator and
// the transformer: it drives a 100 MHz V_MOD, four 1 ns pulses PUL[0..3]
// per cycle, and puts a chosen voltage on the V_MOD(H) node during PUL[0]
// and PUL[2].  That level is held for stretches of several 8-cycle groups.
// Checked: the code changes only at the start of every 8th carrier cycle,
// 100 ps after the V_MOD edge (the V_FALL clock), by exactly one step; once
// a level has been held for two groups the step goes down when
// level - 0.3 V > V_REF and up otherwise; both ends saturate; nothing
// moves while the carrier is off.
`timescale 1ps/1ps
module tb_mpwm_feedback;
  import mpwm_pkg::*;
  logic v_mod = 1'b0, rst = 1'b0;
  logic [3:0] pul = '0;
  real  v_node = 0.0, v_ref = 0.9, level = 0.0;
  pwd_t v_pwd, prev_code;
  logic v_up_dn, v_fall, v_ck_ud;
  real  v_fb;
  int checks = 0, failures = 0;
  int n_cycle = 0, groups_same = 0;
  time t_cycle = 0;
  int n_up = 0, n_down = 0, n_sat_hi = 0, n_sat_lo = 0;

  mpwm_feedback dut (
    .v_mod(v_mod), .pul(pul), .rst(rst), .v_node_h(v_node), .v_ref(v_ref),
    .v_pwd(v_pwd), .v_up_dn(v_up_dn), .v_fall(v_fall), .v_ck_ud(v_ck_ud), .v_fb(v_fb)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d, t=%0t)", what, n_cycle, $time);
    end
  endtask

  // One carrier cycle with four 1 ns pulses.
  task automatic cycle();
    n_cycle++;
    t_cycle = $time;
    v_mod = 1'b1;
    pul[0] = 1'b1; v_node = level;
    #1000 pul[0] = 1'b0; pul[1] = 1'b1; v_node = 0.0;
    #1000 pul[1] = 1'b0; pul[2] = 1'b1; v_node = level;
    #1000 pul[2] = 1'b0; pul[3] = 1'b1; v_node = 0.0;
    #1000 pul[3] = 1'b0;
    #1000 v_mod = 1'b0;
    #5000;
  endtask

  // Every code change: timing and size.
  always @(v_pwd) begin
    if (!rst && $time > 10) begin
      check(n_cycle % 8 == 0, $sformatf("code changes in cycle %0d", n_cycle));
      check($time - t_cycle == 100, "code changes 100 ps after the carrier edge");
    end
  end

  // Hold a level for a number of 8-cycle groups and check each group's step.
  task automatic run(real lvl, int groups);
    level = lvl;
    groups_same = 0;
    for (int g = 0; g < groups; g++) begin
      prev_code = v_pwd;
      repeat (8) cycle();
      groups_same++;
      if (groups_same > 2) begin
        bit want_up = !(lvl - 0.3 > v_ref);
        if (want_up) begin
          if (prev_code == 4'd15) begin check(v_pwd == 4'd15, "saturate at 15"); n_sat_hi++; end
          else begin check(v_pwd == prev_code + 1, $sformatf("step up %0d->%0d", prev_code, v_pwd)); n_up++; end
        end else begin
          if (prev_code == 4'd0) begin check(v_pwd == 4'd0, "saturate at 0"); n_sat_lo++; end
          else begin check(v_pwd == prev_code - 1, $sformatf("step down %0d->%0d", prev_code, v_pwd)); n_down++; end
        end
      end else begin
        check(v_pwd == prev_code || v_pwd == prev_code + 1 || v_pwd == prev_code - 1, "single step");
      end
    end
  endtask

  // Asynchronous reset needs an edge: raise it just after time 0.
  initial #1 rst = 1'b1;

  initial begin
    #2000 rst = 1'b0;
    #1000;
    check(v_pwd == 4'd0, "reset code");
    run(0.8, 20);      // 0.5 V < 0.9 V: widen up to 15
    check(v_pwd == 4'd15, "reached 15");
    run(1.5, 20);      // 1.2 V > 0.9 V: narrow down to 0
    check(v_pwd == 4'd0, "reached 0");
    for (int s = 0; s < 12; s++) run(($urandom % 2) ? 1.6 : 0.7, 3 + ($urandom % 4));
    // Carrier off: nothing may move.
    prev_code = v_pwd;
    #2_000_000;
    check(v_pwd == prev_code, "frozen while carrier is off");
    check(n_up > 0 && n_down > 0 && n_sat_hi > 0 && n_sat_lo > 0, "all step kinds seen");
    $display("steps up=%0d down=%0d sat_hi=%0d sat_lo=%0d", n_up, n_down, n_sat_hi, n_sat_lo);
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
