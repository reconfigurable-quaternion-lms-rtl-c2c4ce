// qlms_x_tap: input-sample register of one filter tap (X_TAP).
//
// Holds x(n - l + 1) for tap l.  On EN_X it loads the sample from its input,
// which is the new filter input for the first tap and the previous tap's
// register for the others, so the chain of X_TAP blocks forms the filter's
// delay line.  The register clears to zero on reset (this design's choice).
// Timing: x changes one cycle after the cycle in which en_x is high.
module qlms_x_tap #(
  parameter int unsigned W = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_x,
  input  logic [3:0][W-1:0] x_in,
  output logic [3:0][W-1:0] x
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x <= '0;
    else if (en_x) x <= x_in;
  end

endmodule
