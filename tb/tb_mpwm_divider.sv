// Testbench for mpwm_divider (RATIO 8): after reset the output must rise on
// the 4th and fall on the 8th rising input edge of every group of eight,
// i.e. one output period per eight input periods; reset must clear it.
`timescale 1ps/1ps
module tb_mpwm_divider;
  logic clk_in = 1'b0, rst = 1'b0, clk_out;
  int checks = 0, failures = 0;
  int n_in = 0;

  mpwm_divider #(.RATIO(8)) dut (.clk_in(clk_in), .rst(rst), .clk_out(clk_out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (edge %0d, t=%0t)", what, n_in, $time);
    end
  endtask

  // Asynchronous reset needs an edge: raise it just after time 0.
  initial #1 rst = 1'b1;

  initial begin
    #1000;
    check(clk_out == 1'b0, "output low in reset");
    rst = 1'b0;
    #1000;
    for (int k = 1; k <= 80; k++) begin
      clk_in = 1'b1; #10;
      n_in = k;
      // Reference: output is high after edges 4..7 of each group of 8.
      check(clk_out == ((k % 8) >= 4), $sformatf("output %0b after edge %0d", clk_out, k));
      #4990 clk_in = 1'b0; #5000;
    end
    // Reset in the middle of a count.
    repeat (5) begin clk_in = 1'b1; #5000 clk_in = 1'b0; #5000; end
    check(clk_out == 1'b1, "high after 5 edges");
    rst = 1'b1; #100;
    check(clk_out == 1'b0, "reset clears output");
    rst = 1'b0; #100;
    repeat (3) begin clk_in = 1'b1; #5000 clk_in = 1'b0; #5000; end
    check(clk_out == 1'b0, "low after 3 edges");
    clk_in = 1'b1; #5000 clk_in = 1'b0; #5000;
    check(clk_out == 1'b1, "high after 4 edges");
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
