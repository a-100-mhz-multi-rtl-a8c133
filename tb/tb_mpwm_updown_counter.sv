// Testbench for mpwm_updown_counter: random directions against a reference
// count that saturates at 0 and 15; both ends are driven into on purpose.
`timescale 1ps/1ps
module tb_mpwm_updown_counter;
  logic v_fall = 1'b0, rst = 1'b0, v_up_dn = 1'b0;
  logic [3:0] v_pwd;
  int checks = 0, failures = 0;
  int ref_code = 0, n_sat_hi = 0, n_sat_lo = 0;

  mpwm_updown_counter #(.WIDTH(4)) dut (.v_fall(v_fall), .rst(rst), .v_up_dn(v_up_dn), .v_pwd(v_pwd));

  task automatic step(logic up);
    v_up_dn = up;
    #1000 v_fall = 1'b1;
    if (up) begin if (ref_code == 15) n_sat_hi++; else ref_code++; end
    else    begin if (ref_code == 0)  n_sat_lo++; else ref_code--; end
    #200 v_fall = 1'b0;
    #800;
    checks++;
    if (int'(v_pwd) != ref_code) begin
      failures++;
      $display("FAIL code %0d expected %0d (t=%0t)", v_pwd, ref_code, $time);
    end
  endtask

  // Asynchronous reset needs an edge: raise it just after time 0.
  initial #1 rst = 1'b1;

  initial begin
    #1000;
    checks++;
    if (v_pwd != 4'd0) begin failures++; $display("FAIL reset value"); end
    rst = 1'b0;
    repeat (20) step(1'b1);          // run into the top
    repeat (20) step(1'b0);          // run into the bottom
    repeat (300) step(1'($urandom % 2));
    repeat (7) step(1'b1);
    rst = 1'b1; ref_code = 0; #100;
    checks++;
    if (v_pwd != 4'd0) begin failures++; $display("FAIL async reset"); end
    rst = 1'b0;
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin failures++; $display("FAIL saturation not reached"); end
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
