// qlms_sum_tree: the Sigma-TAPn block, sum of all L tap products.
//
// A binary tree of two-input quaternion adders (qlms_quat_sum), one register
// per level, ceil(log2(L)) levels, as in the original design.  When a level
// has an odd number of terms, the last one goes through a one-cycle delay
// register instead of an adder, so that every path has the same latency
// (the original design's rule for L that is not a power of two).  Each
// level widens the result by one bit, so the sum is exact: the output is
// W + ceil(log2(L)) bits wide with the input's fraction bits.
// Timing: sum is valid ceil(log2(L)) cycles after the products (0 for L = 1).
module qlms_sum_tree
  import qlms_pkg::*;
#(
  parameter int unsigned L = 8,
  parameter int unsigned W = 15,
  localparam int unsigned S  = tree_stages(L),
  localparam int unsigned WS = W + S
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [L-1:0][3:0][W-1:0]   prods,
  output logic [3:0][WS-1:0]         sum
);

  // lvl[s][k]: term k at level s, all at full output width.
  logic [3:0][WS-1:0] lvl [S+1][L];

  for (genvar k = 0; k < L; k++) begin : g_in
    for (genvar c = 0; c < 4; c++) begin : g_c
      assign lvl[0][k][c] = WS'(signed'(prods[k][c]));
    end
  end

  for (genvar s = 1; s <= S; s++) begin : g_lvl
    localparam int unsigned NIN  = (L + (1 << (s - 1)) - 1) >> (s - 1);
    localparam int unsigned NOUT = (NIN + 1) / 2;
    for (genvar k = 0; k < NOUT; k++) begin : g_node
      if (2 * k + 1 < NIN) begin : g_add
        qlms_quat_sum #(.IN_W(WS), .OUT_W(WS)) u_sum (
          .clk, .rst_n, .a(lvl[s-1][2*k]), .b(lvl[s-1][2*k+1]), .s(lvl[s][k])
        );
      end else begin : g_delay
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) lvl[s][k] <= '0;
          else        lvl[s][k] <= lvl[s-1][2*k];
        end
      end
    end
    for (genvar k = NOUT; k < L; k++) begin : g_unused
      assign lvl[s][k] = '0;
    end
  end

  assign sum = lvl[S][0];

endmodule
