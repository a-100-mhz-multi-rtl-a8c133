// Testbench for mpwm_edge_detector: a rising-edge and a falling-edge
// instance watch the same input.  Each must give exactly one pulse per
// matching edge, starting 100 ps after it and lasting 200 ps, and none on
// the other edge.
`timescale 1ps/1ps
module tb_mpwm_edge_detector;
  logic a = 1'b0, p_rise, p_fall;
  int checks = 0, failures = 0;
  time t_edge, t_rr, t_rf, t_fr, t_ff;
  int n_rise = 0, n_fall = 0;

  mpwm_edge_detector #(.FALLING(1'b0)) dut_r (.a(a), .pulse(p_rise));
  mpwm_edge_detector #(.FALLING(1'b1)) dut_f (.a(a), .pulse(p_fall));

  always @(posedge p_rise) begin t_rr = $time; n_rise++; end
  always @(negedge p_rise) t_rf = $time;
  always @(posedge p_fall) begin t_fr = $time; n_fall++; end
  always @(negedge p_fall) t_ff = $time;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    #2000;
    check(p_rise == 1'b0 && p_fall == 1'b0, "idle");
    n_rise = 0;   // forget start-up pulses from the random initial state
    n_fall = 0;
    for (int k = 1; k <= 20; k++) begin
      int unsigned hi;
      hi = 500 + ($urandom % 5000);
      t_edge = $time;
      a = 1'b1;
      #(hi);
      check(n_rise == k && n_fall == k - 1, "one pulse per rising edge");
      check(t_rr - t_edge == 100 && t_rf - t_edge == 300, "rising pulse timing");
      t_edge = $time;
      a = 1'b0;
      #(500 + ($urandom % 5000));
      check(n_fall == k && n_rise == k, "one pulse per falling edge");
      check(t_fr - t_edge == 100 && t_ff - t_edge == 300, "falling pulse timing");
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
