// qlms_mult_system: the "Multiplier System" of the quaternion multiplier.
//
// Four signed multipliers working side by side, p[i] = a[i] * b[i].  In the
// quaternion product they are used twice per product: once for the four
// direct terms T1..T4 and once, a cycle later, for the four butterfly terms
// T5..T8, which halves the multiplier count from eight to four (the choice
// the original design makes).  The caller picks the operands with the
// SEL_MULT multiplexers in front of this block.
//
// Timing: operands are registered on entry and the products are registered
// on exit, two cycles of latency, one new set of operands every cycle.  The
// two pipeline registers are this design's choice; they are the input and
// output registers of a DSP multiplier slice.  Products are full width.
module qlms_mult_system #(
  parameter int unsigned W_OP = 17
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [3:0][W_OP-1:0]    a,
  input  logic [3:0][W_OP-1:0]    b,
  output logic [3:0][2*W_OP-1:0]  p
);

  logic [3:0][W_OP-1:0] a_q, b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      p   <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
      for (int i = 0; i < 4; i++)
        p[i] <= (2*W_OP)'(signed'(a_q[i])) * (2*W_OP)'(signed'(b_q[i]));
    end
  end

endmodule
