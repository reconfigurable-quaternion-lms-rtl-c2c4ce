// tb_qlms_quat_product: checks the pipelined quaternion multiplier.
// For each operand pair the operands are held for four cycles with
// SEL_MULT = 0, 1, 1 in cycles 1..3 (the control sequence), and the result
// must appear exactly in cycle 7.  The expected value is the Hamilton
// product (16 multiplications), floored to 12 fraction bits and saturated.
// Random pairs in the full s2.12 range, unit quaternions and extremes that
// saturate are used.
module tb_qlms_quat_product;
  import qlms_pkg::*;
  import qlms_ref_pkg::*;
  localparam int W = 15, FRAC = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sel_mult_e sel_mult;
  logic [3:0][W-1:0] in1, in2, p;
  int checks = 0, failures = 0, n_sat = 0;

  qlms_quat_product #(.W(W), .FRAC(FRAC)) dut (.clk, .rst_n, .sel_mult, .in1, .in2, .p);

  initial begin
    sel_mult = SEL_RAW; in1 = '0; in2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      quat_t x, y, r, ex;
      for (int i = 0; i < 4; i++) begin
        x[i] = rnd(16383); y[i] = rnd(16383);
        if (n == 0) begin x[i] = 16383; y[i] = 16383; end
        if (n == 1) begin x[i] = -16384; y[i] = 16383; end
        if (n == 2) begin x[i] = -16384; y[i] = -16384; end
        if (n == 3) begin x[i] = (i == 0) ? 4096 : 0; end           // 1 * y = y
        if (n % 3 == 1 && n > 3) begin x[i] = rnd(2048); y[i] = rnd(2048); end
      end
      r  = qmul(x, y, W, FRAC);
      ex = qmul_exact(x, y);
      for (int i = 0; i < 4; i++) if (r[i] != (ex[i] >>> FRAC)) n_sat++;
      // cycle c0: operands appear
      in1 = (4*W)'(pack(x, W));
      in2 = (4*W)'(pack(y, W));
      for (int c = 1; c <= 7; c++) begin
        @(negedge clk);
        sel_mult = (c == 1) ? SEL_RAW : (c <= 3) ? SEL_HADA : SEL_RAW;
        if (c == 4) begin in1 = (4*W)'($urandom); in2 = (4*W)'($urandom); end
      end
      @(negedge clk);  // cycle c0 + 7 ... sampled at its negedge
      checks++;
      if (unpack(256'(p), W) != r) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %h", n, p);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
