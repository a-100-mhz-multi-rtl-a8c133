// Testbench for mpwm_dir_dff: q must take d at each rising clock edge only,
// hold between edges, and clear on reset.
`timescale 1ps/1ps
module tb_mpwm_dir_dff;
  logic d = 1'b0, clk = 1'b0, rst = 1'b0, q;
  logic expected = 1'b0;
  int checks = 0, failures = 0;

  mpwm_dir_dff dut (.d(d), .clk(clk), .rst(rst), .q(q));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Asynchronous reset needs an edge: raise it just after time 0.
  initial #1 rst = 1'b1;

  initial begin
    #500;
    check(q == 1'b0, "reset value");
    rst = 1'b0;
    repeat (200) begin
      d = 1'($urandom % 2);
      #300 clk = 1'b1; expected = d;
      #100 check(q == expected, "captures d");
      d = ~d;                       // change d while clock is high
      #200 clk = 1'b0;
      #200 check(q == expected, "holds between edges");
    end
    d = 1'b1; #100 clk = 1'b1; #100 clk = 1'b0;
    rst = 1'b1; #50;
    check(q == 1'b0, "async reset");
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
