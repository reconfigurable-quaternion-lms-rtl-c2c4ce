// tb_qlms_tap: checks one TAPn unit driven by the real sequencer (L = 8,
// 22-cycle period).  Every period the test loads a new random input sample,
// presents a random conjugated error during the update phase, and checks:
// prod_tap = conj(w) x in cycle 7 of the period, the new weight
// w + mu x conj(e) after EN_W, and the delay-line output.  The expected
// values use the Hamilton product with the RTL's rounding and saturation.
module tb_qlms_tap;
  import qlms_pkg::*;
  import qlms_ref_pkg::*;
  localparam int W = 15, FRAC = 12, S = 3, PERIOD = 22, PH2 = 8 + S;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en_x, en_w;
  sel_prod_e sel_prod;
  sel_mult_e sel_mult;
  logic [W-1:0] mu;
  logic [3:0][W-1:0] x_in, conj_e, x_out, w, prod_tap;
  int checks = 0, failures = 0;
  quat_t xm, wm, ce, xn;

  qlms_control #(.L(8)) u_ctl (.clk, .rst_n, .en_x, .en_w, .sel_prod, .sel_mult);
  qlms_tap #(.W(W), .FRAC(FRAC)) dut (.clk, .rst_n, .en_x, .en_w, .sel_prod, .sel_mult,
                                      .mu, .x_in, .conj_e, .x_out, .w, .prod_tap);

  initial begin
    mu = W'(1352);              // 0.33
    x_in = '0; conj_e = '0;
    xm = '{0, 0, 0, 0}; wm = '{0, 0, 0, 0}; ce = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 1; cyc < 60 * PERIOD; cyc++) begin
      int c;
      @(negedge clk);
      c = cyc % PERIOD;
      if (c == 0) begin
        checks += 2;
        if (unpack(256'(x_out), W) != xm) begin failures++; $display("FAIL x cyc=%0d", cyc); end
        if (unpack(256'(w), W) != wm)     begin failures++; $display("FAIL w cyc=%0d", cyc); end
      end
      if (c == 7) begin
        checks++;
        if (unpack(256'(prod_tap), W) != qmul(qconj(wm, W), xm, W, FRAC)) begin
          failures++; $display("FAIL prod cyc=%0d", cyc);
        end
      end
      if (c == PH2 - 1) begin
        for (int i = 0; i < 4; i++) ce[i] = rnd(8191);
        conj_e = (4*W)'(pack(ce, W));
      end
      if (c == PERIOD - 2) begin
        quat_t p;
        p = qmul(xm, ce, W, FRAC);
        for (int i = 0; i < 4; i++) wm[i] = sat(wm[i] + sat((1352 * p[i]) >>> FRAC, W), W);
        for (int i = 0; i < 4; i++) xn[i] = rnd(16383);
        x_in = (4*W)'(pack(xn, W));
      end
      if (c == PERIOD - 1) xm = xn;
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
