// Testbench for mpwm_comparator: on each rising clock edge the output must
// become (v_plus > v_minus) 50 ps later and hold until the next edge, even
// when the inputs cross in between.
`timescale 1ps/1ps
module tb_mpwm_comparator;
  logic clk = 1'b0, out;
  real  v_plus = 0.9, v_minus = 0.0;
  logic expected = 1'b0;
  int checks = 0, failures = 0;

  mpwm_comparator #(.T_DEC_PS(50)) dut (.clk(clk), .v_plus(v_plus), .v_minus(v_minus), .out(out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #1000;
    repeat (200) begin
      logic prev_out;
      v_minus = real'($urandom % 1800) / 1000.0;
      prev_out = out;
      #500 clk = 1'b1;
      expected = (v_plus > v_minus);
      #40 check(out == prev_out, "no change prev_out decision delay");
      #20 check(out == expected, "decision");
      v_minus = (v_minus > 0.9) ? 0.0 : 1.8;   // cross the threshold
      #500 check(out == expected, "holds while clock high");
      clk = 1'b0;
      #500 check(out == expected, "holds while clock low");
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
