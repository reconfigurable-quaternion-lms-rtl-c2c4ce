// qlms_error: the ERROR block, e(n) = d(n) - y(n) and CONJ_ERROR = e*(n).
//
// The desired value d(n) is captured from the input interface on EN_X,
// together with the newest filter input x(n), so that it belongs to the
// same sample.  The error register follows d - y while SEL_PROD = SEL_WX
// and freezes when SEL_PROD switches to SEL_XE: the last value it takes is
// the one computed from the finished adder-tree output, and it stays steady
// while the taps form x e* with it.  Using SEL_PROD as the hold enable is
// this design's choice.  The difference is saturated to W bits.
// Timing: e and conj_e are valid from the first SEL_XE cycle on.
module qlms_error
  import qlms_pkg::*;
#(
  parameter int unsigned W  = 15,
  parameter int unsigned YW = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en_x,
  input  sel_prod_e          sel_prod,
  input  logic [3:0][W-1:0]  d_in,
  input  logic [3:0][YW-1:0] y,
  output logic [3:0][W-1:0]  e,
  output logic [3:0][W-1:0]  conj_e
);

  logic [3:0][W-1:0] d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= '0;
      e   <= '0;
    end else begin
      if (en_x) d_q <= d_in;
      if (sel_prod == SEL_WX)
        for (int i = 0; i < 4; i++)
          e[i] <= W'(sat_to(64'(signed'(d_q[i])) - 64'(signed'(y[i])), W));
    end
  end

  qlms_quat_conj #(.W(W)) u_conj (.q(e), .q_conj(conj_e));

endmodule
