// Testbench for mpwm_peak_detector: v_fb must hold the highest v_in minus
// the 0.3 V diode drop since the last clear, ignore falling inputs, and
// read 0 V while clear is high.
`timescale 1ps/1ps
module tb_mpwm_peak_detector;
  real  v_in = 0.0, v_fb, peak;
  logic clr = 1'b1;
  int checks = 0, failures = 0;

  mpwm_peak_detector #(.V_F(0.3)) dut (.v_in(v_in), .clr(clr), .v_fb(v_fb));

  task automatic check(real expv, string what);
    checks++;
    if (v_fb > expv + 1e-9 || v_fb < expv - 1e-9) begin
      failures++;
      $display("FAIL %s: v_fb=%f expected %f (t=%0t)", what, v_fb, expv, $time);
    end
  endtask

  initial begin
    #100 check(0.0, "cleared");
    clr = 1'b0;
    for (int r = 0; r < 10; r++) begin
      peak = 0.0;
      for (int k = 0; k < 50; k++) begin
        v_in = real'($urandom % 1800) / 1000.0;
        if (v_in - 0.3 > peak) peak = v_in - 0.3;
        #50 check(peak, "tracks peak");
      end
      v_in = 0.0;
      #50 check(peak, "holds after input drops");
      clr = 1'b1;
      #50 check(0.0, "clear");
      v_in = 1.5;
      #50 check(0.0, "stays clear while clr high");
      clr = 1'b0;
      #50 check(1.2, "recaptures input present at release");
      v_in = 0.0;
      #50;
      clr = 1'b1; #50 clr = 1'b0; #50;
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
