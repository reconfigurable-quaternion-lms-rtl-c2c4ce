// tb_qlms_error: checks the ERROR block.  d is captured on en_x only; the
// error register follows sat(d - y) while SEL_PROD = SEL_WX and holds while
// SEL_PROD = SEL_XE; conj_e is the conjugate of e.  Values that saturate
// the 15-bit error are included.
module tb_qlms_error;
  import qlms_pkg::*;
  import qlms_ref_pkg::*;
  localparam int W = 15, YW = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en_x;
  sel_prod_e sel_prod;
  logic [3:0][W-1:0]  d_in, e, conj_e;
  logic [3:0][YW-1:0] y;
  int checks = 0, failures = 0, holds = 0, n_sat = 0;
  quat_t dq, em;

  qlms_error #(.W(W), .YW(YW)) dut (.clk, .rst_n, .en_x, .sel_prod, .d_in, .y, .e, .conj_e);

  initial begin
    en_x = 0; sel_prod = SEL_WX; d_in = '0; y = '0;
    dq = '{0, 0, 0, 0}; em = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      quat_t dn, yn;
      for (int i = 0; i < 4; i++) begin
        dn[i] = rnd(16383);
        yn[i] = (n % 5 == 0) ? rnd(131071) : rnd(16383);
      end
      en_x     = ($urandom_range(3) == 0);
      sel_prod = ($urandom_range(2) == 0) ? SEL_XE : SEL_WX;
      d_in = (4*W)'(pack(dn, W));
      y    = (4*YW)'(pack(yn, YW));
      @(posedge clk);
      if (sel_prod == SEL_WX)
        for (int i = 0; i < 4; i++) begin
          em[i] = sat(dq[i] - yn[i], W);
          if (em[i] != dq[i] - yn[i]) n_sat++;
        end
      else holds++;
      if (en_x) dq = dn;
      @(negedge clk);
      checks += 2;
      if (unpack(256'(e), W) != em) begin failures++; $display("FAIL e n=%0d", n); end
      if (unpack(256'(conj_e), W) != qconj(em, W)) begin failures++; $display("FAIL conj n=%0d", n); end
    end
    checks++;
    if (holds == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
