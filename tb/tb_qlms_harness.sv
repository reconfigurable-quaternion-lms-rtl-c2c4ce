// tb_qlms_harness: stimulus and checking for a complete quaternion LMS filter.
//
// Drives a stream of (x, d) samples into qlms_top and checks every output
// against a sample-by-sample model of the algorithm: y = sum conj(w_l) x_l,
// e = d - y, w_l += mu x_l conj(e), with the RTL's number format.  The
// desired signal comes from a fixed "unknown" quaternion FIR system, so the
// filter converges; the harness checks that the error shrinks.  It also
// checks the sample period and the output latency, and counts the events
// the design is built around: product operand switch (SEL_PROD), multiplier
// reuse (SEL_MULT), weight loads, delay-line shifts, source overrun and
// underrun, a step-size change and saturation.  Each must occur at least
// once.  The clock and the device are owned by the instantiating testbench.
module tb_qlms_harness
  import qlms_ref_pkg::*;
#(
  parameter int L           = 8,
  parameter int INT_BITS    = 2,
  parameter int FRAC_BITS   = 12,
  parameter int FIXED_DELAY = 16,
  parameter int N_SAMPLES   = 400
) (
  input  logic                            clk,
  input  logic                            rst_n,
  output logic [1+INT_BITS+FRAC_BITS-1:0] mu,
  output logic                            in_valid,
  output logic [3:0][INT_BITS+FRAC_BITS:0] x_in,
  output logic [3:0][INT_BITS+FRAC_BITS:0] d_in,
  input  logic                            in_taken,
  input  logic                            overrun,
  input  logic                            underrun,
  input  logic [3:0][INT_BITS+FRAC_BITS:0] y_out,
  input  logic [3:0][INT_BITS+FRAC_BITS:0] e_out,
  input  logic                            out_valid,
  input  logic [3:0][INT_BITS+FRAC_BITS:0] x_last,
  input  logic [L-1:0][3:0][INT_BITS+FRAC_BITS:0] w_taps,
  input  logic                            sel_prod,
  input  logic                            sel_mult,
  input  logic                            en_w,
  output logic                            done,
  output int                              checks,
  output int                              failures
);

  localparam int W      = 1 + INT_BITS + FRAC_BITS;
  localparam int S      = $clog2(L);
  localparam int PERIOD = FIXED_DELAY + S + 3;
  localparam longint ONE = 64'sd1 <<< FRAC_BITS;

  // Model state.
  quat_t  xs [L];
  quat_t  ws [L];
  quat_t  wt [L];          // the unknown system the filter identifies
  quat_t  hist [L];        // clean input history for d
  quat_t  dq, pend_x, pend_d;
  logic   fresh, take_prev;
  longint mu_v;

  // Event counters.
  int n_out, n_taken, n_sel_prod, n_sel_mult, n_en_w, n_over, n_under;
  int n_mu_change, n_sat;
  int cyc, last_taken_cyc, written;
  logic sel_prod_q, sel_mult_q;
  real err_early, err_late;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endfunction

  // Next source sample: x random, d = sum conj(wt_l) x(n-l+1).
  function automatic void next_sample(output quat_t x, output quat_t d, input int k);
    quat_t acc, p;
    for (int i = 0; i < 4; i++) x[i] = rnd(ONE / 2);
    if (k == N_SAMPLES / 2 + 7 || k == N_SAMPLES / 2 + 8)   // oversized input
      for (int i = 0; i < 4; i++) x[i] = (64'sd1 <<< (W - 1)) - 1;
    for (int l = L - 1; l > 0; l--) hist[l] = hist[l-1];
    hist[0] = x;
    acc = '{0, 0, 0, 0};
    for (int l = 0; l < L; l++) begin
      p = qmul(qconj(wt[l], W), hist[l], W, FRAC_BITS);
      for (int i = 0; i < 4; i++) acc[i] += p[i];
    end
    for (int i = 0; i < 4; i++) d[i] = sat(acc[i], W);
    // two oversized samples with extreme desired values: saturate e
    if (k == N_SAMPLES / 2 + 7 || k == N_SAMPLES / 2 + 8)
      for (int i = 0; i < 4; i++)
        d[i] = (k % 2 == 1) ? -(64'sd1 <<< (W - 1)) : (64'sd1 <<< (W - 1)) - 1;
  endfunction

  // Product floored but not saturated, to detect saturation.
  function automatic quat_t qmul_exact_q(input quat_t x, input quat_t y);
    quat_t r;
    r = qmul_exact(x, y);
    for (int i = 0; i < 4; i++) r[i] = r[i] >>> FRAC_BITS;
    return r;
  endfunction

  function automatic real qnorm2(input quat_t q);
    real r;
    r = 0.0;
    for (int i = 0; i < 4; i++) r += (real'(q[i]) / real'(ONE)) ** 2;
    return r;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    in_valid = 0; x_in = '0; d_in = '0;
    mu_v = ONE / 20;                      // 0.05
    mu = W'(mu_v);
    for (int l = 0; l < L; l++) begin
      xs[l] = '{0, 0, 0, 0};
      ws[l] = '{0, 0, 0, 0};
      hist[l] = '{0, 0, 0, 0};
      for (int i = 0; i < 4; i++) wt[l][i] = rnd(ONE / (2 * (longint'(l) + 1)));
    end
    dq = '{0, 0, 0, 0}; pend_x = '{0, 0, 0, 0}; pend_d = '{0, 0, 0, 0};
    fresh = 0; take_prev = 0;
    n_out = 0; n_taken = 0; n_sel_prod = 0; n_sel_mult = 0; n_en_w = 0;
    n_over = 0; n_under = 0; n_mu_change = 0; n_sat = 0;
    cyc = 0; last_taken_cyc = -1; written = 0;
    sel_prod_q = 0; sel_mult_q = 0;
    err_early = 0.0; err_late = 0.0;
  end

  always @(negedge clk) begin
    if (rst_n && !done) begin
      quat_t y, e, p, dw, yq;
      cyc++;

      // Control events.
      if (sel_prod && !sel_prod_q) n_sel_prod++;
      if (sel_mult && !sel_mult_q) n_sel_mult++;
      if (en_w) n_en_w++;
      sel_prod_q = sel_prod;
      sel_mult_q = sel_mult;

      // Input interface.  A value of in_valid seen now was sampled at the
      // clock edge that has just passed, while in_taken seen now will be
      // acted on at the next edge; take_prev is in_taken of the past edge.
      check(overrun  == (in_valid && fresh && !take_prev), "overrun flag");
      check(underrun == (take_prev && !fresh), "underrun flag");
      if (overrun)  n_over++;
      if (underrun) n_under++;
      if (take_prev) begin
        for (int l = L - 1; l > 0; l--) xs[l] = xs[l-1];
        xs[0] = pend_x;
        dq = pend_d;
      end
      if (in_valid) begin
        pend_x = unpack(256'(x_in), W);
        pend_d = unpack(256'(d_in), W);
        fresh = 1;
      end else if (take_prev) fresh = 0;
      take_prev = in_taken;

      // 1. Output of the current period.
      if (out_valid) begin
        longint ysum [4];
        check(last_taken_cyc < 0 || cyc - last_taken_cyc == S + 10, "output latency");
        check(unpack(256'(x_last), W) == xs[L-1], "oldest delay-line sample");
        for (int i = 0; i < 4; i++) ysum[i] = 0;
        for (int l = 0; l < L; l++) begin
          check(unpack(256'(w_taps[l]), W) == ws[l], $sformatf("weight of tap %0d", l));
          p = qmul(qconj(ws[l], W), xs[l], W, FRAC_BITS);
          if (p != qmul_exact_q(qconj(ws[l], W), xs[l])) n_sat++;
          for (int i = 0; i < 4; i++) ysum[i] += p[i];
        end
        for (int i = 0; i < 4; i++) begin
          yq[i] = sat(ysum[i], W);
          e[i]  = sat(dq[i] - ysum[i], W);
          if (e[i] != dq[i] - ysum[i] || yq[i] != ysum[i]) n_sat++;
        end
        check(unpack(256'(y_out), W) == yq, $sformatf("y of output %0d", n_out));
        check(unpack(256'(e_out), W) == e,  $sformatf("e of output %0d", n_out));
        if (n_out >= 10 && n_out < 60) err_early += qnorm2(e);
        if (n_out >= N_SAMPLES / 2 - 50 && n_out < N_SAMPLES / 2) err_late += qnorm2(e);
        // weight update
        for (int l = 0; l < L; l++) begin
          p = qmul(xs[l], qconj(e, W), W, FRAC_BITS);
          for (int i = 0; i < 4; i++) begin
            dw[i] = sat((mu_v * p[i]) >>> FRAC_BITS, W);
            ws[l][i] = sat(ws[l][i] + dw[i], W);
          end
        end
        n_out++;
      end

      // 2. Sample period.
      if (in_taken) begin
        if (last_taken_cyc >= 0) check(cyc - last_taken_cyc == PERIOD, "sample period");
        last_taken_cyc = cyc;
        n_taken++;
        if (n_taken == N_SAMPLES / 2 + 20) begin  // step-size change
          mu_v = ONE / 10;
          mu = W'(mu_v);
          n_mu_change++;
        end
      end

      // 3. Stimulus for the next cycle: one sample three cycles after each
      // take; an extra sample once (overrun), a missing sample once (underrun).
      in_valid = 0;
      if (written < N_SAMPLES &&
          ((last_taken_cyc >= 0 && cyc - last_taken_cyc == 3 && n_taken != 12) ||
           (n_taken == 6 && cyc - last_taken_cyc == 8))) begin
        quat_t xn, dn;
        next_sample(xn, dn, written);
        x_in = (4*W)'(pack(xn, W));
        d_in = (4*W)'(pack(dn, W));
        in_valid = 1;
        written++;
      end

      if (n_out == N_SAMPLES + 2) begin
        check(n_sel_prod > 0, "SEL_PROD switched");
        check(n_sel_mult > 0, "SEL_MULT used");
        check(n_en_w == n_taken || n_en_w == n_taken + 1, "one weight load per period");
        check(n_over > 0, "overrun occurred");
        check(n_under > 0, "underrun occurred");
        check(n_mu_change > 0, "step size changed");
        check(n_sat > 0, "error saturated");
        check(err_late < 0.1 * err_early, "filter converged");
        $display("events: periods=%0d outputs=%0d sel_prod=%0d sel_mult=%0d en_w=%0d overrun=%0d underrun=%0d mu_change=%0d saturations=%0d",
                 n_taken, n_out, n_sel_prod, n_sel_mult, n_en_w, n_over, n_under, n_mu_change, n_sat);
        $display("mean |e|^2: early %f, after convergence %f", err_early / 50.0, err_late / 50.0);
        done = 1;
      end
    end
  end

endmodule
