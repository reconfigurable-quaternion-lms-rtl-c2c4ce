// tb_qlms_data_out: checks the output interface.  y changes every cycle;
// SEL_PROD runs through periods of random length.  At each switch from
// SEL_WX to SEL_XE, out_valid must pulse one cycle later with y_out equal
// to the saturated y of the last SEL_WX cycle and e_out to the error of
// the first SEL_XE cycle; the outputs must hold in between.
module tb_qlms_data_out;
  import qlms_pkg::*;
  import qlms_ref_pkg::*;
  localparam int W = 15, YW = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  sel_prod_e sel_prod;
  logic [3:0][YW-1:0] y;
  logic [3:0][W-1:0]  e, y_out, e_out;
  logic out_valid;
  int checks = 0, failures = 0, pulses = 0, n_sat = 0;
  quat_t last_y, exp_y, exp_e;
  logic pend;

  qlms_data_out #(.W(W), .YW(YW)) dut (.clk, .rst_n, .sel_prod, .y, .e, .y_out, .e_out, .out_valid);

  initial begin
    sel_prod = SEL_WX; y = '0; e = '0; pend = 0;
    exp_y = '{0, 0, 0, 0}; exp_e = '{0, 0, 0, 0}; last_y = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      int n_wx, n_xe;
      n_wx = 2 + $urandom_range(8);
      n_xe = 3 + $urandom_range(8);
      for (int c = 0; c < n_wx + n_xe; c++) begin
        quat_t yn, en;
        logic switching;
        for (int i = 0; i < 4; i++) begin yn[i] = rnd(131071); en[i] = rnd(16383); end
        switching = (c == n_wx);
        sel_prod = (c < n_wx) ? SEL_WX : SEL_XE;
        y = (4*YW)'(pack(yn, YW));
        e = (4*W)'(pack(en, W));
        @(negedge clk);
        pend = 0;
        if (switching) begin
          for (int i = 0; i < 4; i++) begin
            exp_y[i] = sat(last_y[i], W);
            if (exp_y[i] != last_y[i]) n_sat++;
          end
          exp_e = en;
          pend = 1;
        end
        checks += 3;
        if (out_valid != pend) begin failures++; $display("FAIL valid p=%0d c=%0d", p, c); end
        if (unpack(256'(y_out), W) != exp_y) begin failures++; $display("FAIL y p=%0d c=%0d", p, c); end
        if (unpack(256'(e_out), W) != exp_e) begin failures++; $display("FAIL e p=%0d c=%0d", p, c); end
        if (out_valid) pulses++;
        if (sel_prod == SEL_WX) last_y = yn;
      end
    end
    checks++;
    if (pulses < 39 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
