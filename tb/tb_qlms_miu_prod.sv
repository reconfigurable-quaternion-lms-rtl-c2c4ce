// tb_qlms_miu_prod: checks the step-size multiplier.  Each component of the
// output, one cycle after the input, must be floor(mu * p / 2^12) saturated
// to 15 bits; values of mu from the table of step sizes (0.33 ... 0.01),
// negative and extreme values are used.
module tb_qlms_miu_prod;
  import qlms_ref_pkg::*;
  localparam int W = 15, FRAC = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0] mu;
  logic [3:0][W-1:0] p, dw;
  int checks = 0, failures = 0;
  longint mus [8] = '{1352, 1065, 614, 369, 205, 123, 41, -16384};

  qlms_miu_prod #(.W(W), .FRAC(FRAC)) dut (.clk, .rst_n, .mu, .p, .dw);

  initial begin
    mu = '0; p = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      quat_t q, r;
      longint m;
      m = (n < 8) ? mus[n] : rnd(16383);
      for (int i = 0; i < 4; i++) begin
        q[i] = (n == 7) ? -16384 : rnd(16383);
        r[i] = sat((m * q[i]) >>> FRAC, W);
      end
      mu = W'(m);
      p  = (4*W)'(pack(q, W));
      @(negedge clk);
      checks++;
      if (unpack(256'(dw), W) != r) begin
        failures++;
        $display("FAIL n=%0d", n);
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
