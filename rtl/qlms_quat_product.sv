// qlms_quat_product: pipelined quaternion product p = in1 * in2 (QUART_PRODUCT).
//
// The product follows the reduced-multiplication form of the original
// design, which needs 8 real multiplications instead of 16:
//   T1 = x1 y1   T2 = x4 y3   T3 = x2 y4   T4 = x3 y2
//   T5..T8 = (H(x)/2) * (H(y)/2), H = the AddSub butterfly sums
//   p1 = 2T1 - ((T5+T6)+(T7+T8))     p2 = -2T2 + ((T5+T6)-(T7+T8))
//   p3 = -2T3 + ((T5-T6)+(T7-T8))    p4 = -2T4 + ((T5-T6)-(T7-T8))
// which equals the Hamilton product of Eq. (3) exactly.  The four
// multipliers of qlms_mult_system are shared between T1..T4 and T5..T8:
// a SEL_MULT multiplexer in front of each operand picks the raw (one-cycle
// delayed) components when SEL_MULT = 0 and the butterfly outputs when
// SEL_MULT = 1.  T1..T4 are held in a register while T5..T8 pass through
// the output AddSub System, and the last stage adds the two.
//
// Number format: in1, in2 and p are signed fixed point with FRAC fraction
// bits in W bits.  The 1/2 gains in front of the multipliers and the 2 gain
// on T1..T4 are realised by moving the binary point, so no bit is lost
// inside the block; only the result is truncated (floor) to FRAC fraction
// bits and saturated to W bits.  Multiplier operands are W+2 bits (17 for
// s2.12, within one DSP48 18x25 multiplier).
//
// Timing (the schedule of qlms_control relies on it): hold in1/in2 steady
// from cycle c0 to c0+3, drive sel_mult = 0 at c0+1 and 1 at c0+2; p is
// valid during cycle c0+7 (latency 7).  Keeping sel_mult = 1 at c0+3 as
// well, as the control ROM does, is harmless.
module qlms_quat_product
  import qlms_pkg::*;
#(
  parameter int unsigned W    = 15,
  parameter int unsigned FRAC = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  sel_mult_e         sel_mult,
  input  logic [3:0][W-1:0] in1,
  input  logic [3:0][W-1:0] in2,
  output logic [3:0][W-1:0] p
);

  localparam int unsigned WO = W + 2;       // multiplier operand width
  localparam int unsigned WP = 2 * WO;      // multiplier product width
  localparam int unsigned WF = WP + 3;      // final sum width

  // Raw operands arranged for T1..T4, delayed one cycle (the "d0 z^-1" input).
  logic [3:0][WO-1:0] raw1_q, raw2_q;
  // Butterfly sums of both operands (AddSub Systems on IN1 and IN2).
  logic [3:0][W+1:0]  h1, h2;
  // Multiplier operands after the SEL_MULT multiplexers.
  logic [3:0][WO-1:0] m1, m2;
  logic [3:0][WP-1:0] mp;
  // SEL_MULT delayed to line up with the multiplier output.
  sel_mult_e          sel_d1, sel_d2;
  // Held T1..T4 and the butterfly of T5..T8.
  logic [3:0][WP-1:0] t14_q;
  logic [3:0][WP+1:0] u;

  qlms_addsub #(.W_IN(W)) u_addsub_in1 (.clk, .rst_n, .a(in1), .h(h1));
  qlms_addsub #(.W_IN(W)) u_addsub_in2 (.clk, .rst_n, .a(in2), .h(h2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raw1_q <= '0;
      raw2_q <= '0;
      sel_d1 <= SEL_RAW;
      sel_d2 <= SEL_RAW;
    end else begin
      // T1 = x1 y1, T2 = x4 y3, T3 = x2 y4, T4 = x3 y2
      raw1_q[0] <= WO'(signed'(in1[0]));  raw2_q[0] <= WO'(signed'(in2[0]));
      raw1_q[1] <= WO'(signed'(in1[3]));  raw2_q[1] <= WO'(signed'(in2[2]));
      raw1_q[2] <= WO'(signed'(in1[1]));  raw2_q[2] <= WO'(signed'(in2[3]));
      raw1_q[3] <= WO'(signed'(in1[2]));  raw2_q[3] <= WO'(signed'(in2[1]));
      sel_d1 <= sel_mult;
      sel_d2 <= sel_d1;
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      m1[i] = (sel_mult == SEL_HADA) ? WO'(h1[i]) : raw1_q[i];
      m2[i] = (sel_mult == SEL_HADA) ? WO'(h2[i]) : raw2_q[i];
    end
  end

  qlms_mult_system #(.W_OP(WO)) u_mult (.clk, .rst_n, .a(m1), .b(m2), .p(mp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  t14_q <= '0;
    else if (sel_d2 == SEL_RAW)  t14_q <= mp;
  end

  qlms_addsub #(.W_IN(WP)) u_addsub_out (.clk, .rst_n, .a(mp), .h(u));

  // Final stage.  T1..T4 carry 2*FRAC fraction bits, the butterfly products
  // carry 2*FRAC+2 (each factor was halved), so 2*Ti is Ti shifted left by 3.
  logic signed [WF-1:0] t2x [4];
  logic signed [WF-1:0] f   [4];

  always_comb begin
    for (int i = 0; i < 4; i++) t2x[i] = WF'(signed'(t14_q[i])) <<< 3;
    f[0] =  t2x[0] - WF'(signed'(u[0]));
    f[1] = -t2x[1] + WF'(signed'(u[1]));
    f[2] = -t2x[2] + WF'(signed'(u[2]));
    f[3] = -t2x[3] + WF'(signed'(u[3]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else
      for (int i = 0; i < 4; i++)
        p[i] <= W'(sat_to(64'(f[i] >>> (FRAC + 2)), W));
  end

endmodule
