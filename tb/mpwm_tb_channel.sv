// Testbench model of the transformer primary node V_MOD(H).
//
// A first-order stand-in for the driven transformer node: while the drive
// is high the node voltage charges towards VDD with time constant TAU_PS,
// while it is low it discharges towards 0 V with the same time constant.
// It is integrated with forward Euler in steps of STEP_PS.  The peak after
// one pulse of width w from 0 V is VDD * (1 - exp(-w / TAU_PS)), so wider
// pulses give a higher peak, which is all the control loop needs to see.
// The time constant is a testbench choice, not a property of the real
// 105 nH transformer.
`timescale 1ps/1ps
module mpwm_tb_channel #(
  parameter real         VDD     = 1.8,
  parameter real         TAU_PS  = 2000.0,
  parameter int unsigned STEP_PS = 10
) (
  input  logic drive,
  output real  v
);
  initial begin
    v = 0.0;
    forever begin
      #(STEP_PS);
      if (drive) v = v + (VDD - v) * real'(STEP_PS) / TAU_PS;
      else       v = v - v * real'(STEP_PS) / TAU_PS;
    end
  end
endmodule
