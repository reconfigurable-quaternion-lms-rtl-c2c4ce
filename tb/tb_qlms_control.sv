// tb_qlms_control: checks the sequencer for L = 8, 5, 1 and 64 taps.
// Over many periods it checks, cycle by cycle from the start of a period:
// the period is 16 + ceil(log2(L)) + 3 cycles (22 for L = 8); EN_W is high
// only in cycle T_W = 16 + ceil(log2(L)) + 1 and EN_X only in cycle
// T_X = T_W + 1; SEL_PROD selects w*x up to cycle 7 + ceil(log2(L)) and x e*
// from then on; SEL_MULT is 1 in cycles 2, 3 and in the same two cycles of
// the update phase.
module tb_qlms_control;
  import qlms_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NCFG = 4;
  localparam int LS [NCFG] = '{8, 5, 1, 64};
  logic      en_x [NCFG], en_w [NCFG];
  sel_prod_e sp   [NCFG];
  sel_mult_e sm   [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    qlms_control #(.L(LS[g])) dut (.clk, .rst_n, .en_x(en_x[g]), .en_w(en_w[g]),
                                   .sel_prod(sp[g]), .sel_mult(sm[g]));
  end

  function automatic int stages(input int l);
    int s = 0;
    while ((1 << s) < l) s++;
    return s;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);   // observe cycle cyc + 1; cycle 0 is the one in which reset ends
      for (int g = 0; g < NCFG; g++) begin
        int s, period, c, ph2;
        s = stages(LS[g]);
        period = 16 + s + 3;
        c = (cyc + 1) % period;
        ph2 = 8 + s;
        checks += 4;
        if (en_w[g] != (c == 16 + s + 1)) begin failures++; $display("FAIL en_w L=%0d c=%0d", LS[g], c); end
        if (en_x[g] != (c == 16 + s + 2)) begin failures++; $display("FAIL en_x L=%0d c=%0d", LS[g], c); end
        if ((sp[g] == SEL_XE) != (c >= ph2)) begin failures++; $display("FAIL sel_prod L=%0d c=%0d", LS[g], c); end
        if ((sm[g] == SEL_HADA) != (c == 2 || c == 3 || c == ph2 + 2 || c == ph2 + 3)) begin
          failures++; $display("FAIL sel_mult L=%0d c=%0d", LS[g], c);
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
