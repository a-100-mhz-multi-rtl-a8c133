// Testbench for mpwm_delay_cell: each edge must reappear exactly DELAY_PS
// later, and a pulse shorter than the delay must be swallowed.
`timescale 1ps/1ps
module tb_mpwm_delay_cell;
  localparam int unsigned D = 150;
  logic a = 1'b0, y;
  int checks = 0, failures = 0;

  mpwm_delay_cell #(.DELAY_PS(D)) dut (.a(a), .y(y));

  task automatic expect_y(logic v, string what);
    checks++;
    if (y !== v) begin
      failures++;
      $display("FAIL %s: y=%0b expected %0b at %0t", what, y, v, $time);
    end
  endtask

  initial begin
    #1000;
    repeat (20) begin
      int unsigned w;
      w = 200 + ($urandom % 2000);
      a = 1'b1;
      #(D - 1) expect_y(1'b0, "before rising delay");
      #2       expect_y(1'b1, "after rising delay");
      #(w - D - 1);
      a = 1'b0;
      #(D - 1) expect_y(1'b1, "before falling delay");
      #2       expect_y(1'b0, "after falling delay");
      #500;
    end
    // A 50 ps glitch is shorter than the buffer delay: filtered.
    a = 1'b1; #50 a = 1'b0;
    #400 expect_y(1'b0, "short glitch filtered");
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
