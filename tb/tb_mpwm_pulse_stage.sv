// Testbench for mpwm_pulse_stage: for every code, the pulse must start
// with the trigger edge and last 1025 ps + 150 ps * code; V_REP must rise
// when the pulse ends; tap i must lag the trigger by (i+1)*150 ps.
`timescale 1ps/1ps
module tb_mpwm_pulse_stage;
  import mpwm_pkg::*;
  logic trig = 1'b0;
  pwd_t code = '0;
  logic pul, v_rep;
  logic [N_TAPS-1:0] taps;
  int checks = 0, failures = 0;
  time t_rise, t_pul_r, t_pul_f, t_rep;
  time t_tap [N_TAPS];

  mpwm_pulse_stage dut (.trig(trig), .v_pwd(code), .pul(pul), .v_rep(v_rep), .taps(taps));

  always @(posedge pul)   t_pul_r = $time;
  always @(negedge pul)   t_pul_f = $time;
  always @(posedge v_rep) t_rep   = $time;
  for (genvar i = 0; i < N_TAPS; i++) begin : g_tap
    always @(posedge taps[i]) t_tap[i] = $time;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL code=%0d %s (t=%0t)", code, what, $time);
    end
  endtask

  initial begin
    #5000;
    for (int c = 0; c < 16; c++) begin
      int unsigned w;
      w = 1025 + 150 * c;   // expected width, from the spec numbers
      code = pwd_t'(c);
      #1000;
      t_rise = $time;
      trig = 1'b1;
      #6000;
      check(t_pul_r == t_rise, "pulse starts with trigger");
      check(t_pul_f - t_rise == w, $sformatf("pulse width %0d expected %0d", t_pul_f - t_rise, w));
      check(t_rep - t_rise == w, "V_REP rises when the pulse ends");
      for (int i = 0; i < N_TAPS; i++)
        check(t_tap[i] - t_rise == 150 * (i + 1), $sformatf("tap %0d delay", i));
      trig = 1'b0;
      #6000;
      check(pul == 1'b0 && v_rep == 1'b0, "idle after falling trigger");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
