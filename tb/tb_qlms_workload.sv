// tb_qlms_workload: drives a quaternion LMS filter with 3-D rotation data.
//
// MODE 0, prediction: the input is a noisy rotation quaternion q(n) (20 dB
// SNR) and the desired signal the position of a fixed point rotated ten
// samples ahead, p(n+10) = q(n+10) p q*(n+10).
// MODE 1, denoising: the input is q(n) plus noise (10 dB SNR) and the
// desired signal the clean q(n).
// The rotation turns at a steady rate about a slowly precessing axis; the
// noise is Gaussian (Box-Muller on $urandom).  Every output is checked
// bit-exactly against a fixed-point model; a double-precision model of the
// same LMS recursion gives the relative RMS error of the fixed-point output
// (sqrt(sum (y_double - y_fixed)^2 / sum y_double^2)), which must stay
// below RRMSE_MAX.  Over the last quarter of the run the error power must
// be below a tenth of the desired signal's power, and in MODE 1 its output must be closer to q(n) than the noisy input.
module tb_qlms_workload
  import qlms_ref_pkg::*;
#(
  parameter int  L         = 8,
  parameter int  INT_BITS  = 2,
  parameter int  FRAC_BITS = 12,
  parameter int  MODE      = 0,
  parameter real MU        = 0.05,
  parameter real RRMSE_MAX = 0.02,
  parameter int  N_SAMPLES = 1500
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  output logic [INT_BITS+FRAC_BITS:0]            mu,
  output logic                                   in_valid,
  output logic [3:0][INT_BITS+FRAC_BITS:0]       x_in,
  output logic [3:0][INT_BITS+FRAC_BITS:0]       d_in,
  input  logic                                   in_taken,
  input  logic [3:0][INT_BITS+FRAC_BITS:0]       y_out,
  input  logic [3:0][INT_BITS+FRAC_BITS:0]       e_out,
  input  logic                                   out_valid,
  output logic                                   done,
  output int                                     checks,
  output int                                     failures
);

  localparam int  W   = 1 + INT_BITS + FRAC_BITS;
  localparam real ONE = real'(64'sd1 <<< FRAC_BITS);
  localparam int  AHEAD = 10;

  typedef real rquat_t [4];

  // relative RMS error of the fixed-point output, valid once done is set
  real rrmse = 0.0;

  rquat_t clean [N_SAMPLES + AHEAD + 1];
  rquat_t xr [N_SAMPLES + 1], dr [N_SAMPLES + 1];

  // fixed-point and double models
  quat_t  xs [L], ws [L], dq, pend_x, pend_d;
  rquat_t xsr [L], wsr [L];
  real    dqr [4], pend_xr [4], pend_dr [4];
  longint mu_fix;
  int     n_out, written, last_take, cyc;
  logic   take_prev;
  real    num, den, e_first, e_last, in_err, out_err, d_pow;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hfffffffe)) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic rquat_t rmul(input rquat_t x, input rquat_t y);
    rquat_t r;
    r[0] = x[0]*y[0] - x[1]*y[1] - x[2]*y[2] - x[3]*y[3];
    r[1] = x[0]*y[1] + x[1]*y[0] + x[2]*y[3] - x[3]*y[2];
    r[2] = x[0]*y[2] - x[1]*y[3] + x[2]*y[0] + x[3]*y[1];
    r[3] = x[0]*y[3] + x[1]*y[2] - x[2]*y[1] + x[3]*y[0];
    return r;
  endfunction

  function automatic rquat_t rconj(input rquat_t q);
    return '{q[0], -q[1], -q[2], -q[3]};
  endfunction

  function automatic longint tofix(input real v);
    return sat(longint'($floor(v * ONE + 0.5)), W);
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin
    real sigma;
    rquat_t p0;
    done = 0; checks = 0; failures = 0;
    in_valid = 0; x_in = '0; d_in = '0;
    mu_fix = longint'($floor(MU * ONE + 0.5));
    mu = W'(mu_fix);
    // rotation sequence
    for (int n = 0; n <= N_SAMPLES + AHEAD; n++) begin
      real phi, ax, ay, az, nrm;
      phi = 0.04 * n;
      ax = $cos(0.003 * n); ay = $sin(0.003 * n); az = 0.6;
      nrm = $sqrt(ax*ax + ay*ay + az*az);
      clean[n] = '{$cos(phi / 2.0), $sin(phi / 2.0) * ax / nrm,
                   $sin(phi / 2.0) * ay / nrm, $sin(phi / 2.0) * az / nrm};
    end
    // unit quaternion: power 1, i.e. 0.25 per component
    sigma = $sqrt(0.25 / ((MODE == 0) ? 100.0 : 10.0));
    p0 = '{0.0, 0.0, 0.0, 1.0};
    for (int n = 0; n <= N_SAMPLES; n++) begin
      for (int i = 0; i < 4; i++) xr[n][i] = clean[n][i] + sigma * gauss();
      dr[n] = (MODE == 0) ? rmul(rmul(clean[n + AHEAD], p0), rconj(clean[n + AHEAD]))
                          : clean[n];
    end
    for (int l = 0; l < L; l++) begin
      xs[l] = '{0, 0, 0, 0}; ws[l] = '{0, 0, 0, 0};
      xsr[l] = '{0.0, 0.0, 0.0, 0.0}; wsr[l] = '{0.0, 0.0, 0.0, 0.0};
    end
    dq = '{0, 0, 0, 0}; pend_x = '{0, 0, 0, 0}; pend_d = '{0, 0, 0, 0};
    dqr = '{0.0, 0.0, 0.0, 0.0}; pend_xr = '{0.0, 0.0, 0.0, 0.0}; pend_dr = '{0.0, 0.0, 0.0, 0.0};
    n_out = 0; written = 0; last_take = -1; cyc = 0; take_prev = 0;
    num = 0.0; den = 0.0; e_first = 0.0; e_last = 0.0; in_err = 0.0; out_err = 0.0; d_pow = 0.0;
  end

  always @(negedge clk) begin
    if (rst_n && !done) begin
      cyc++;
      // A sample taken at the last edge enters both delay lines.
      if (take_prev) begin
        for (int l = L - 1; l > 0; l--) begin xs[l] = xs[l-1]; xsr[l] = xsr[l-1]; end
        xs[0] = pend_x; dq = pend_d;
        xsr[0] = pend_xr; dqr = pend_dr;
      end
      take_prev = in_taken;

      if (out_valid) begin
        longint ys [4];
        quat_t  e, yq, p;
        rquat_t yr, er, pr;
        for (int i = 0; i < 4; i++) begin ys[i] = 0; yr[i] = 0.0; end
        for (int l = 0; l < L; l++) begin
          p = qmul(qconj(ws[l], W), xs[l], W, FRAC_BITS);
          pr = rmul(rconj(wsr[l]), xsr[l]);
          for (int i = 0; i < 4; i++) begin ys[i] += p[i]; yr[i] += pr[i]; end
        end
        for (int i = 0; i < 4; i++) begin
          yq[i] = sat(ys[i], W);
          e[i]  = sat(dq[i] - ys[i], W);
          er[i] = dqr[i] - yr[i];
        end
        check(unpack(256'(y_out), W) == yq, $sformatf("y of output %0d", n_out));
        check(unpack(256'(e_out), W) == e,  $sformatf("e of output %0d", n_out));
        for (int l = 0; l < L; l++) begin
          p = qmul(xs[l], qconj(e, W), W, FRAC_BITS);
          pr = rmul(xsr[l], rconj(er));
          for (int i = 0; i < 4; i++) begin
            ws[l][i] = sat(ws[l][i] + sat((mu_fix * p[i]) >>> FRAC_BITS, W), W);
            wsr[l][i] = wsr[l][i] + MU * pr[i];
          end
        end
        // statistics (outputs 1.. carry samples 0..)
        if (n_out >= 1) begin
          for (int i = 0; i < 4; i++) begin
            real yf, err2;
            yf = real'(yq[i]) / ONE;
            num += (yr[i] - yf) ** 2;
            den += yr[i] ** 2;
            err2 = (real'(e[i]) / ONE) ** 2;
            if (n_out <= N_SAMPLES / 4) e_first += err2;
            if (n_out > 3 * N_SAMPLES / 4) begin
              e_last += err2;
              d_pow  += dr[n_out - 1][i] ** 2;
              in_err  += (xr[n_out - 1][i] - clean[n_out - 1][i]) ** 2;
              out_err += (yf - clean[n_out - 1][i]) ** 2;
            end
          end
        end
        n_out++;
      end

      if (in_taken) last_take = cyc;

      // one sample three cycles after each take
      in_valid = 0;
      if (written <= N_SAMPLES - 1 && last_take >= 0 && cyc - last_take == 3) begin
        quat_t xq, dq_n;
        for (int i = 0; i < 4; i++) begin
          xq[i] = tofix(xr[written][i]);
          dq_n[i] = tofix(dr[written][i]);
          pend_xr[i] = xr[written][i];
          pend_dr[i] = dr[written][i];
        end
        pend_x = xq; pend_d = dq_n;
        x_in = (4*W)'(pack(xq, W));
        d_in = (4*W)'(pack(dq_n, W));
        in_valid = 1;
        written++;
      end

      if (n_out == N_SAMPLES + 1) begin
        rrmse = $sqrt(num / den);
        $display("%s: error power / desired power over the last quarter = %f",
                 (MODE == 0) ? "prediction" : "denoising", e_last / d_pow);
        $display("%s: rRMSE fixed vs double = %f %%, mean |e|^2 first quarter %f, last quarter %f",
                 (MODE == 0) ? "prediction" : "denoising", 100.0 * rrmse,
                 e_first / (N_SAMPLES / 4), e_last / (N_SAMPLES / 4));
        check(rrmse < RRMSE_MAX, "relative RMS error of the fixed-point filter");
        check(e_last < 0.1 * d_pow, "error power below 10% of the desired signal's");
        if (MODE == 1) begin
          $display("denoising: input noise power %f, output error power %f", in_err, out_err);
          check(out_err < in_err, "output closer to the clean rotation than the input");
        end
        done = 1;
      end
    end
  end

endmodule
