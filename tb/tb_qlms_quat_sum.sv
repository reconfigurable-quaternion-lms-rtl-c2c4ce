// tb_qlms_quat_sum: checks the registered quaternion adder in both of its
// uses: saturating to the data width (weight update) and widening by one
// bit (adder tree), on random values including overflowing sums.
module tb_qlms_quat_sum;
  import qlms_ref_pkg::*;
  localparam int W = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0][W-1:0] a, b, s_sat;
  logic [3:0][W:0]   s_wide;
  int checks = 0, failures = 0, n_sat = 0;

  qlms_quat_sum #(.IN_W(W), .OUT_W(W))     dut   (.clk, .rst_n, .a, .b, .s(s_sat));
  qlms_quat_sum #(.IN_W(W), .OUT_W(W + 1)) dut_w (.clk, .rst_n, .a, .b, .s(s_wide));

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      quat_t qa, qb, rs, rw;
      for (int i = 0; i < 4; i++) begin
        qa[i] = rnd(16383); qb[i] = rnd(16383);
        rw[i] = qa[i] + qb[i];
        rs[i] = sat(rw[i], W);
        if (rs[i] != rw[i]) n_sat++;
      end
      a = (4*W)'(pack(qa, W));
      b = (4*W)'(pack(qb, W));
      @(negedge clk);
      checks += 2;
      if (unpack(256'(s_sat), W) != rs)      begin failures++; $display("FAIL sat n=%0d", n); end
      if (unpack(256'(s_wide), W + 1) != rw) begin failures++; $display("FAIL wide n=%0d", n); end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
