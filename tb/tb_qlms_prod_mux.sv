// tb_qlms_prod_mux: checks the W/X and X/E operand multiplexers for both
// settings of SEL_PROD on random operands.
module tb_qlms_prod_mux;
  import qlms_pkg::*;
  localparam int W = 15;
  sel_prod_e sel_prod;
  logic [3:0][W-1:0] conj_w, x, conj_e, prod1, prod2;
  int checks = 0, failures = 0;

  qlms_prod_mux #(.W(W)) dut (.sel_prod, .conj_w, .x, .conj_e, .prod1, .prod2);

  initial begin
    for (int n = 0; n < 200; n++) begin
      conj_w = (4*W)'({$urandom, $urandom});
      x      = (4*W)'({$urandom, $urandom});
      conj_e = (4*W)'({$urandom, $urandom});
      sel_prod = (n % 2 != 0) ? SEL_XE : SEL_WX;
      #1;
      checks++;
      if (sel_prod == SEL_WX ? (prod1 != conj_w || prod2 != x)
                             : (prod1 != x || prod2 != conj_e)) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
