// qlms_addsub: the "AddSub System" of the quaternion multiplier.
//
// A two-level add/subtract butterfly over the four components a0..a3 of a
// quaternion-sized vector, eight adders in all:
//   level 1:  s0 = a0+a1   s1 = a2+a3   s2 = a0-a1   s3 = a2-a3
//   level 2:  h0 = s0+s1   h1 = s0-s1   h2 = s2+s3   h3 = s2-s3
// On the product inputs this forms the four sums that feed T5..T8 of the
// reduced-multiplication quaternion product; on the T5..T8 products it
// forms the combinations (T5+T6)+(T7+T8), (T5+T6)-(T7+T8), (T5-T6)+(T7-T8)
// and (T5-T6)-(T7-T8).  The add/subtract pattern is the original design's;
// the register after each level (two cycles of latency) is this design's
// choice.  Widths grow by one bit per level, so nothing overflows.
module qlms_addsub #(
  parameter int unsigned W_IN = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0][W_IN-1:0]  a,
  output logic [3:0][W_IN+1:0]  h
);

  logic signed [W_IN:0] s [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) s[i] <= '0;
      h <= '0;
    end else begin
      s[0] <= (W_IN+1)'(signed'(a[0])) + (W_IN+1)'(signed'(a[1]));
      s[1] <= (W_IN+1)'(signed'(a[2])) + (W_IN+1)'(signed'(a[3]));
      s[2] <= (W_IN+1)'(signed'(a[0])) - (W_IN+1)'(signed'(a[1]));
      s[3] <= (W_IN+1)'(signed'(a[2])) - (W_IN+1)'(signed'(a[3]));
      h[0] <= (W_IN+2)'(s[0]) + (W_IN+2)'(s[1]);
      h[1] <= (W_IN+2)'(s[0]) - (W_IN+2)'(s[1]);
      h[2] <= (W_IN+2)'(s[2]) + (W_IN+2)'(s[3]);
      h[3] <= (W_IN+2)'(s[2]) - (W_IN+2)'(s[3]);
    end
  end

endmodule
