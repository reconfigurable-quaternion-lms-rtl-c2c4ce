// tb_qlms_addsub: checks the two-level add/subtract butterfly.
// Random 15-bit component vectors, including the extremes, are streamed in
// one per cycle; each output is checked at the second clock edge after it is applied with the sums
// (a0+a1)+(a2+a3), (a0+a1)-(a2+a3), (a0-a1)+(a2-a3), (a0-a1)-(a2-a3).
module tb_qlms_addsub;
  import qlms_ref_pkg::*;
  localparam int W = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0][W-1:0] a;
  logic [3:0][W+1:0] h;
  int checks = 0, failures = 0;
  quat_t hist [3];

  qlms_addsub #(.W_IN(W)) dut (.clk, .rst_n, .a, .h);

  initial begin
    a = '0;
    for (int k = 0; k < 3; k++) hist[k] = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      quat_t q, x, r;
      for (int i = 0; i < 4; i++)
        q[i] = (n < 4) ? ((n % 2 != 0) ? -(64'sd1 <<< (W-1)) : (64'sd1 <<< (W-1)) - 1) : rnd(16383);
      a = (4*W)'(pack(q, W));
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = q;
      @(negedge clk);
      if (n >= 1) begin
        x = hist[1];
        r = '{(x[0]+x[1])+(x[2]+x[3]), (x[0]+x[1])-(x[2]+x[3]),
              (x[0]-x[1])+(x[2]-x[3]), (x[0]-x[1])-(x[2]-x[3])};
        checks++;
        if (unpack(256'(h), W + 2) != r) begin
          failures++;
          $display("FAIL n=%0d", n);
        end
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
