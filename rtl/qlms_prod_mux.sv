// qlms_prod_mux: operand multiplexers W/X and X/E in front of a tap's
// quaternion product.
//
// SEL_PROD = SEL_WX: PROD1 = conj(W), PROD2 = X     -> w* x, output term
// SEL_PROD = SEL_XE: PROD1 = X,       PROD2 = conj(E) -> x e*, update term
// The input assignment of both multiplexers is the original design's.
// Purely combinational.
module qlms_prod_mux
  import qlms_pkg::*;
#(
  parameter int unsigned W = 15
) (
  input  sel_prod_e         sel_prod,
  input  logic [3:0][W-1:0] conj_w,
  input  logic [3:0][W-1:0] x,
  input  logic [3:0][W-1:0] conj_e,
  output logic [3:0][W-1:0] prod1,
  output logic [3:0][W-1:0] prod2
);

  always_comb begin
    unique case (sel_prod)
      SEL_WX: begin prod1 = conj_w; prod2 = x;      end
      SEL_XE: begin prod1 = x;      prod2 = conj_e; end
    endcase
  end

endmodule
