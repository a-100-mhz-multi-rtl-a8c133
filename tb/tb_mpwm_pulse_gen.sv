// Testbench for mpwm_pulse_gen: on a 100 MHz carrier, every rising edge of
// V_MOD must produce four consecutive pulses, PUL[x] covering
// [x*w, (x+1)*w) after the edge with w = 1025 ps + 150 ps * code, and
// nothing else.  Codes up to 6 keep the train inside one 10 ns cycle.
`timescale 1ps/1ps
module tb_mpwm_pulse_gen;
  import mpwm_pkg::*;
  logic v_mod = 1'b0;
  pwd_t code = '0;
  logic [3:0] pul;
  int checks = 0, failures = 0;
  time t_edge;
  time t_r [4], t_f [4];
  int n_r [4];

  mpwm_pulse_gen dut (.v_mod(v_mod), .v_pwd(code), .pul(pul));

  for (genvar x = 0; x < 4; x++) begin : g_mon
    always @(posedge pul[x]) begin t_r[x] = $time; n_r[x]++; end
    always @(negedge pul[x]) t_f[x] = $time;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL code=%0d %s (t=%0t)", code, what, $time);
    end
  endtask

  initial begin
    for (int x = 0; x < 4; x++) n_r[x] = 0;
    #5000;
    for (int c = 0; c < 16; c++) begin
      int unsigned w;
      w = 1025 + 150 * c;   // expected width, from the spec numbers
      code = pwd_t'(c);
      #20000;
      for (int x = 0; x < 4; x++) n_r[x] = 0;
      // Three carrier cycles at 100 MHz, 50 % duty.
      for (int k = 0; k < 3; k++) begin
        t_edge = $time;
        v_mod = 1'b1;
        #5000 v_mod = 1'b0;
        #5000;
        if (c <= 6) begin
          for (int x = 0; x < 4; x++) begin
            check(t_r[x] - t_edge == x * w, $sformatf("PUL[%0d] start %0d", x, t_r[x] - t_edge));
            check(t_f[x] - t_edge == (x + 1) * w, $sformatf("PUL[%0d] end %0d", x, t_f[x] - t_edge));
          end
        end
      end
      #20000;
      for (int x = 0; x < 4; x++)
        check(n_r[x] == 3, $sformatf("PUL[%0d] pulse count %0d", x, n_r[x]));
      if (c > 6) begin
        // Train longer than a cycle: check the last pulse of the last cycle.
        check(t_f[3] - t_edge == 4 * w, "PUL[3] end, long code");
        check(t_r[0] - t_edge == 0 && t_f[0] - t_edge == w, "PUL[0], long code");
      end
    end
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
