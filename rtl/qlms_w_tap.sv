// qlms_w_tap: weight register of one filter tap (W_TAP).
//
// Holds the quaternion weight w_l(n).  On EN_W it loads the updated weight
// NEW_W_IN = w_l(n) + mu x(n-l+1) e*(n).  Reset clears it to zero, which is
// the initialisation w(0) = 0 of the LMS algorithm.
// Timing: w changes one cycle after the cycle in which en_w is high.
module qlms_w_tap #(
  parameter int unsigned W = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_w,
  input  logic [3:0][W-1:0] new_w,
  output logic [3:0][W-1:0] w
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    w <= '0;
    else if (en_w) w <= new_w;
  end

endmodule
