// 4-bit up/down counter that holds the pulse-width code V_PWD.
//
// Clocked by V_FALL, the pulse made from the falling edge of V_MOD/8, i.e.
// once every eight oscillator cycles.  On each V_FALL it counts up when
// V_UP/DN is high (the node peak V_FB was below V_REF: widen the pulses)
// and down when it is low (V_FB above V_REF: narrow them).  The width, the
// clock and the meaning of the direction bit follow the design
// description.  The counter saturates at 0 and at 2**WIDTH-1 rather than
// wrapping, and resets asynchronously to 0 (narrowest pulse); both are
// this design's own choices, made so that a loop pushing past either end
// does not jump to the opposite width.
`timescale 1ps/1ps
module mpwm_updown_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             v_fall,
  input  logic             rst,
  input  logic             v_up_dn,
  output logic [WIDTH-1:0] v_pwd
);
  localparam logic [WIDTH-1:0] MAX = '1;

  always_ff @(posedge v_fall or posedge rst) begin
    if (rst)                          v_pwd <= '0;
    else if (v_up_dn && v_pwd != MAX) v_pwd <= v_pwd + 1'b1;
    else if (!v_up_dn && v_pwd != '0) v_pwd <= v_pwd - 1'b1;
  end
endmodule
