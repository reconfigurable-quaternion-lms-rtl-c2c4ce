// qlms_tap: one TAPn processing unit of the quaternion LMS filter.
//
// Each tap owns one delay-line sample x_l = x(n-l+1) (X_TAP) and one weight
// w_l (W_TAP).  A single quaternion multiplier (QUART_PRODUCT) is used twice
// per sample period:
//   SEL_PROD = SEL_WX : prod = conj(w_l) * x_l, this tap's share of the
//                       output y(n) = sum_l w_l* x_l (Eq. 4), sent to the
//                       adder tree on prod_tap;
//   SEL_PROD = SEL_XE : prod = x_l * conj(e), scaled by mu in MIU_PROD and
//                       added to w_l in QUART_SUM, giving NEW_W_IN =
//                       w_l + mu x_l e* (Eq. 6), loaded into W_TAP on EN_W.
// The structure is the original design's (its Fig. 3); the pipeline
// registers inside the blocks are this design's.
//
// Timing, with cycle 0 the first cycle after EN_X: prod_tap holds
// conj(w) x during cycle 7.  If the update phase starts at cycle c0
// (SEL_PROD switched to SEL_XE, conj_e steady), NEW_W_IN is valid at cycle
// c0 + 9.  x_out is the tap's X_TAP register and feeds the next tap.
module qlms_tap
  import qlms_pkg::*;
#(
  parameter int unsigned W    = 15,
  parameter int unsigned FRAC = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_x,
  input  logic              en_w,
  input  sel_prod_e         sel_prod,
  input  sel_mult_e         sel_mult,
  input  logic [W-1:0]      mu,
  input  logic [3:0][W-1:0] x_in,
  input  logic [3:0][W-1:0] conj_e,
  output logic [3:0][W-1:0] x_out,
  output logic [3:0][W-1:0] w,
  output logic [3:0][W-1:0] prod_tap
);

  logic [3:0][W-1:0] x, conj_w, prod1, prod2, dw, new_w;

  qlms_x_tap #(.W(W)) u_x_tap (.clk, .rst_n, .en_x, .x_in, .x);
  qlms_w_tap #(.W(W)) u_w_tap (.clk, .rst_n, .en_w, .new_w, .w);

  qlms_quat_conj #(.W(W)) u_conj (.q(w), .q_conj(conj_w));

  qlms_prod_mux #(.W(W)) u_mux (
    .sel_prod, .conj_w, .x, .conj_e, .prod1, .prod2
  );

  qlms_quat_product #(.W(W), .FRAC(FRAC)) u_prod (
    .clk, .rst_n, .sel_mult, .in1(prod1), .in2(prod2), .p(prod_tap)
  );

  qlms_miu_prod #(.W(W), .FRAC(FRAC)) u_miu (
    .clk, .rst_n, .mu, .p(prod_tap), .dw
  );

  qlms_quat_sum #(.IN_W(W), .OUT_W(W)) u_wsum (
    .clk, .rst_n, .a(w), .b(dw), .s(new_w)
  );

  assign x_out = x;

endmodule
