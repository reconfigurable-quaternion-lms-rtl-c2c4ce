// qlms_ref_pkg: reference arithmetic for the quaternion LMS testbenches.
//
// Quaternions are modelled as four 64-bit integers holding fixed-point
// values with `frac` fraction bits.  The product is the textbook Hamilton
// product (16 multiplications), independent of the reduced-multiplication
// form the hardware uses; results are floored to `frac` fraction bits and
// saturated to `w` bits, the rounding and overflow rules of the RTL.
package qlms_ref_pkg;

  typedef longint quat_t [4];

  function automatic longint sat(input longint v, input int w);
    longint hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // Hamilton product, exact.
  function automatic quat_t qmul_exact(input quat_t x, input quat_t y);
    quat_t r;
    r[0] = x[0]*y[0] - x[1]*y[1] - x[2]*y[2] - x[3]*y[3];
    r[1] = x[0]*y[1] + x[1]*y[0] + x[2]*y[3] - x[3]*y[2];
    r[2] = x[0]*y[2] - x[1]*y[3] + x[2]*y[0] + x[3]*y[1];
    r[3] = x[0]*y[3] + x[1]*y[2] - x[2]*y[1] + x[3]*y[0];
    return r;
  endfunction

  // Product rounded (floor) and saturated to the data format.
  function automatic quat_t qmul(input quat_t x, input quat_t y,
                                 input int w, input int frac);
    quat_t r;
    r = qmul_exact(x, y);
    for (int i = 0; i < 4; i++) r[i] = sat(r[i] >>> frac, w);
    return r;
  endfunction

  function automatic quat_t qconj(input quat_t q, input int w);
    quat_t r;
    r[0] = q[0];
    for (int i = 1; i < 4; i++) r[i] = sat(-q[i], w);
    return r;
  endfunction

  // Unpack a W-bit packed quaternion into signed integers.
  function automatic quat_t unpack(input logic [255:0] v, input int w);
    quat_t r;
    for (int i = 0; i < 4; i++) begin
      longint c;
      c = 0;
      for (int b = 0; b < w; b++) c[b] = v[i*w + b];
      if (c[w-1]) c = c - (64'sd1 <<< w);
      r[i] = c;
    end
    return r;
  endfunction

  function automatic logic [255:0] pack(input quat_t q, input int w);
    logic [255:0] v;
    v = '0;
    for (int i = 0; i < 4; i++)
      for (int b = 0; b < w; b++) v[i*w + b] = q[i][b];
    return v;
  endfunction

  // A random component, uniform in [-range, range] (integer units).
  function automatic longint rnd(input longint range);
    return longint'($urandom_range(32'(2 * range))) - range;
  endfunction

endpackage
