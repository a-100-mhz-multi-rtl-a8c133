// Testbench for mpwm_vco_ook: with a 1 MHz, 50 % PWM command, each 500 ns
// on-time must carry 50 carrier cycles of 10 ns with 5 ns high time, the
// first rising edge at the PWM edge, and the off-time none.
`timescale 1ps/1ps
module tb_mpwm_vco_ook;
  logic v_pwm = 1'b0, v_mod;
  int checks = 0, failures = 0;
  int n_rise = 0;
  time t_last_rise = 0, t_last_fall = 0, t_first = 0;
  int bad_period = 0, bad_high = 0;

  mpwm_vco_ook #(.PERIOD_PS(10000)) dut (.v_pwm(v_pwm), .v_mod(v_mod));

  always @(posedge v_mod) begin
    if (n_rise > 0 && $time > 1_000_000 && $time - t_last_rise != 10000) bad_period++;
    if (n_rise == 0) t_first = $time;
    t_last_rise = $time;
    n_rise++;
  end
  always @(negedge v_mod) begin
    if ($time - t_last_rise != 5000) bad_high++;
    t_last_fall = $time;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    time t_on;
    #1_000_000;
    check(v_mod == 1'b0, "no carrier before PWM");
    bad_period = 0;   // forget start-up events from the random initial state
    bad_high = 0;
    for (int b = 0; b < 4; b++) begin
      n_rise = 0;
      t_on = $time;
      v_pwm = 1'b1;
      #500_000 v_pwm = 1'b0;
      #10_000;
      check(n_rise == 50, $sformatf("50 cycles per burst, got %0d", n_rise));
      check(t_first == t_on, "first edge at PWM rise");
      n_rise = 0;
      #490_000;
      check(n_rise == 0, "silent while PWM low");
      check(v_mod == 1'b0, "low while PWM low");
    end
    check(bad_period == 0, "10 ns period");
    check(bad_high == 0, "5 ns high time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
