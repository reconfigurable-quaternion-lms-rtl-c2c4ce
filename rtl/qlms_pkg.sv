// qlms_pkg: constants and helpers shared by the quaternion LMS (QLMS) filter.
//
// A quaternion travels through the design as a packed array of four signed
// fixed-point components, index 0 = real part q1, 1 = i (q2), 2 = j (q3),
// 3 = k (q4).  The default number format is s2.12: one sign bit, two integer
// bits and twelve fraction bits (15 bits in all); the filter length L
// defaults to 8 taps.  Both defaults are the main configuration of the
// original design.  The schedule constant FIXED_DELAY = 16 is the
// pipeline delay of everything except the output adder tree; it is the
// value the original design uses, and this RTL's pipeline is laid out so
// that it holds (see qlms_control).
//
// sat_to() clamps a wide two's-complement value to a narrower width.  It is
// written for any target width up to 64 bits so one function serves every
// block.
package qlms_pkg;

  localparam int unsigned DEFAULT_L           = 8;
  localparam int unsigned DEFAULT_INT_BITS    = 2;
  localparam int unsigned DEFAULT_FRAC_BITS   = 12;
  localparam int unsigned DEFAULT_FIXED_DELAY = 16;

  // Pipeline latencies the schedule is built on (clock cycles).
  localparam int unsigned PROD_LATENCY   = 7;  // qlms_quat_product, operands to result
  localparam int unsigned UPDATE_LATENCY = 2;  // MIU_PROD register + QUART_SUM register
  localparam int unsigned ERROR_LATENCY  = 1;  // ERROR register

  // Operand selection of the per-tap quaternion product (SEL_PROD).
  typedef enum logic {
    SEL_WX = 1'b0,  // conj(W) x X      : output term of Eq. (4)
    SEL_XE = 1'b1   // X x conj(E)      : update term of Eq. (6)
  } sel_prod_e;

  // Operand selection of the shared multipliers (SEL_MULT).
  typedef enum logic {
    SEL_RAW  = 1'b0,  // raw components      -> T1..T4
    SEL_HADA = 1'b1   // halved butterflies  -> T5..T8
  } sel_mult_e;

  // Number of adder-tree stages, ceil(log2(L)), 0 for L = 1.
  function automatic int unsigned tree_stages(input int unsigned l);
    int unsigned s;
    s = 0;
    while ((1 << s) < l) s++;
    return s;
  endfunction

  // Clamp v to the signed range of a w-bit number (w <= 64).
  function automatic logic signed [63:0] sat_to(input logic signed [63:0] v,
                                                input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
