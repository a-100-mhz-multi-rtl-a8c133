// Frequency divider by RATIO (divide-by-8 in both places it is used).
//
// A binary counter advanced by every rising edge of clk_in; its most
// significant bit is the output, a square wave at 1/RATIO of the input
// frequency with 50 % duty.  RATIO must be a power of two of at least 2.
// The output rises on the (RATIO/2)-th rising input edge after reset and
// falls on the RATIO-th.  The ratio follows the design description; the
// counter structure, the 50 % duty and the asynchronous active-high reset
// are this design's own choices.
`timescale 1ps/1ps
module mpwm_divider #(
  parameter int unsigned RATIO = 8
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out
);
  localparam int unsigned W = $clog2(RATIO);

  logic [W-1:0] cnt;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign clk_out = cnt[W-1];

  initial begin
    assert (RATIO >= 2 && (RATIO & (RATIO - 1)) == 0)
      else $error("mpwm_divider: RATIO must be a power of two >= 2");
  end
endmodule
