// qlms_miu_prod: scales the update product by the step size mu (MIU_PROD).
//
// dw_i = mu * p_i for each of the four components.  mu and p share the
// W-bit format with FRAC fraction bits; mu is an input so that the step
// size can be changed without rebuilding.  The product is truncated (floor)
// to FRAC fraction bits and saturated to W bits: rounding and overflow
// handling are this design's choices.
// Timing: one register, dw is valid the cycle after p.
module qlms_miu_prod
  import qlms_pkg::*;
#(
  parameter int unsigned W    = 15,
  parameter int unsigned FRAC = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      mu,
  input  logic [3:0][W-1:0] p,
  output logic [3:0][W-1:0] dw
);

  logic signed [2*W-1:0] prod [4];

  always_comb
    for (int i = 0; i < 4; i++)
      prod[i] = (2*W)'(signed'(mu)) * (2*W)'(signed'(p[i]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dw <= '0;
    else
      for (int i = 0; i < 4; i++)
        dw[i] <= W'(sat_to(64'(prod[i] >>> FRAC), W));
  end

endmodule
