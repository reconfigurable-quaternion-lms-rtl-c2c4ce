// qlms_top: L-tap quaternion LMS adaptive filter (fQLMS), default L = 8, s2.12.
//
// For every input sample the filter computes
//   y(n) = sum_{l=1..L} w_l*(n) x(n-l+1),  e(n) = d(n) - y(n),
//   w_l(n+1) = w_l(n) + mu x(n-l+1) e*(n)
// with quaternion-valued x, d, w and a real step size mu.  All L taps work
// in parallel, each with its own quaternion multiplier, which is used once
// for w* x and once for x e* in every sample period; the products of all
// taps are summed by a pipelined adder tree.  The blocks and their wiring
// follow the original design (its Fig. 1): DATA IN, the chain of TAPn
// units, Sigma-TAPn, ERROR (whose CONJ_ERROR is broadcast to every tap),
// DATA OUT and the CONTROL block.
//
// Interface: a source writes (x_in, d_in) with a one-cycle in_valid pulse;
// the filter takes the pending sample once per sample period (in_taken)
// and pulses out_valid with y_out = y(n) and e_out = e(n) of the sample
// taken one period earlier.  mu is a W-bit signed value with FRAC fraction
// bits and is read during the update phase of every period.  x_last is
// the oldest sample in the delay line, x(n-L+1), and w_taps the
// current weights.  overrun / underrun pulse
// when the source writes faster or slower than one sample per period.
//
// Timing: one sample every PERIOD = FIXED_DELAY + ceil(log2(L)) + 3 clock
// cycles, 22 cycles for L = 8.  A sample taken at the end of period k has
// its y and e on out_valid in period k+1, in counter cycle ceil(log2(L)) + 9
// (the second cycle of the update phase), ceil(log2(L)) + 10 clock cycles
// after the in_taken pulse.
// The first out_valid after reset reports the all-zero initial state.
module qlms_top
  import qlms_pkg::*;
#(
  parameter  int unsigned L           = DEFAULT_L,
  parameter  int unsigned INT_BITS    = DEFAULT_INT_BITS,
  parameter  int unsigned FRAC_BITS   = DEFAULT_FRAC_BITS,
  parameter  int unsigned FIXED_DELAY = DEFAULT_FIXED_DELAY,
  localparam int unsigned W  = 1 + INT_BITS + FRAC_BITS,
  localparam int unsigned S  = tree_stages(L),
  localparam int unsigned YW = W + S
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      mu,
  input  logic              in_valid,
  input  logic [3:0][W-1:0] x_in,
  input  logic [3:0][W-1:0] d_in,
  output logic              in_taken,
  output logic              overrun,
  output logic              underrun,
  output logic [3:0][W-1:0] y_out,
  output logic [3:0][W-1:0] e_out,
  output logic              out_valid,
  output logic [3:0][W-1:0] x_last,
  output logic [L-1:0][3:0][W-1:0] w_taps
);

  logic       en_x, en_w;
  sel_prod_e  sel_prod;
  sel_mult_e  sel_mult;

  logic [3:0][W-1:0]       x_new, d_new, e, conj_e;
  logic [L:0][3:0][W-1:0]  x_chain;
  logic [L-1:0][3:0][W-1:0] prods;
  logic [3:0][YW-1:0]      y;

  qlms_control #(.L(L), .FIXED_DELAY(FIXED_DELAY)) u_control (
    .clk, .rst_n, .en_x, .en_w, .sel_prod, .sel_mult
  );

  qlms_data_in #(.W(W)) u_data_in (
    .clk, .rst_n, .in_valid, .x_in, .d_in, .take(en_x),
    .x(x_new), .d(d_new), .in_taken, .overrun, .underrun
  );

  assign x_chain[0] = x_new;

  for (genvar l = 0; l < L; l++) begin : g_tap
    qlms_tap #(.W(W), .FRAC(FRAC_BITS)) u_tap (
      .clk, .rst_n, .en_x, .en_w, .sel_prod, .sel_mult, .mu,
      .x_in(x_chain[l]), .conj_e, .x_out(x_chain[l+1]), .w(w_taps[l]),
      .prod_tap(prods[l])
    );
  end

  assign x_last = x_chain[L];

  qlms_sum_tree #(.L(L), .W(W)) u_sum_tree (.clk, .rst_n, .prods, .sum(y));

  qlms_error #(.W(W), .YW(YW)) u_error (
    .clk, .rst_n, .en_x, .sel_prod, .d_in(d_new), .y, .e, .conj_e
  );

  qlms_data_out #(.W(W), .YW(YW)) u_data_out (
    .clk, .rst_n, .sel_prod, .y, .e, .y_out, .e_out, .out_valid
  );

endmodule
