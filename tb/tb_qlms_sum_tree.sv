// tb_qlms_sum_tree: checks the Sigma-TAPn adder tree for L = 8 (three
// levels of adders) and L = 6 (three levels, one of them padded with a
// delay register).  A new set of tap products enters every cycle; each sum
// must appear exactly ceil(log2(L)) = 3 clock edges later and be exact.
module tb_qlms_sum_tree;
  import qlms_ref_pkg::*;
  localparam int W = 15, S = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0][3:0][W-1:0] prods;
  logic [3:0][W+S-1:0]    sum8, sum6;
  int checks = 0, failures = 0;
  quat_t h8 [S+1], h6 [S+1];

  qlms_sum_tree #(.L(8), .W(W)) dut8 (.clk, .rst_n, .prods,             .sum(sum8));
  qlms_sum_tree #(.L(6), .W(W)) dut6 (.clk, .rst_n, .prods(prods[5:0]), .sum(sum6));

  initial begin
    prods = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      quat_t t, a8, a6;
      a8 = '{0, 0, 0, 0}; a6 = '{0, 0, 0, 0};
      for (int l = 0; l < 8; l++) begin
        for (int i = 0; i < 4; i++) t[i] = (n < 2) ? ((n == 0) ? 16383 : -16384) : rnd(16383);
        prods[l] = (4*W)'(pack(t, W));
        for (int i = 0; i < 4; i++) begin
          a8[i] += t[i];
          if (l < 6) a6[i] += t[i];
        end
      end
      for (int k = S; k > 0; k--) begin h8[k] = h8[k-1]; h6[k] = h6[k-1]; end
      h8[0] = a8; h6[0] = a6;
      @(negedge clk);
      if (n >= S - 1) begin
        checks += 2;
        if (unpack(256'(sum8), W + S) != h8[S-1]) begin failures++; $display("FAIL L=8 n=%0d", n); end
        if (unpack(256'(sum6), W + S) != h6[S-1]) begin failures++; $display("FAIL L=6 n=%0d", n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
