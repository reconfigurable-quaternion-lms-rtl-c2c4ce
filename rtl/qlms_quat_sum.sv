// qlms_quat_sum: registered quaternion adder, s = a + b (QUART_SUM).
//
// Adds two quaternions component by component, as the two-input adders of
// the original design do.  The result is saturated to OUT_W bits; with
// OUT_W > IN_W it can never saturate and the sum is exact, as inside the
// output adder tree, while in the weight update OUT_W = IN_W keeps the
// weight in the data format.
// Timing: one register, s is valid the cycle after a and b.
module qlms_quat_sum
  import qlms_pkg::*;
#(
  parameter int unsigned IN_W  = 15,
  parameter int unsigned OUT_W = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0][IN_W-1:0]  a,
  input  logic [3:0][IN_W-1:0]  b,
  output logic [3:0][OUT_W-1:0] s
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else
      for (int i = 0; i < 4; i++)
        s[i] <= OUT_W'(sat_to(64'(signed'(a[i])) + 64'(signed'(b[i])), OUT_W));
  end

endmodule
