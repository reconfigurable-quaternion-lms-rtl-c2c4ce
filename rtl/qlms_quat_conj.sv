// qlms_quat_conj: quaternion conjugate q* = q1 - q2 i - q3 j - q4 k (QUART_CONJ).
//
// Purely combinational: the real part passes, the three imaginary parts are
// negated.  Negating the most negative W-bit value would overflow, so the
// negation saturates to the largest positive value (this design's choice;
// the original design does not discuss it).
module qlms_quat_conj
  import qlms_pkg::*;
#(
  parameter int unsigned W = 15
) (
  input  logic [3:0][W-1:0] q,
  output logic [3:0][W-1:0] q_conj
);

  always_comb begin
    q_conj[0] = q[0];
    for (int i = 1; i < 4; i++)
      q_conj[i] = W'(sat_to(-64'(signed'(q[i])), W));
  end

endmodule
