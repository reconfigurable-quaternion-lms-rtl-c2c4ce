// tb_qlms_quat_conj: checks the quaternion conjugate on random values and
// on the extreme values -2^(W-1), -2^(W-1)+1, 2^(W-1)-1 and 0 in every
// component (every other vector), where the negation of the most negative
// value must saturate.
module tb_qlms_quat_conj;
  import qlms_ref_pkg::*;
  localparam int W = 15;
  logic [3:0][W-1:0] q, q_conj;
  int checks = 0, failures = 0;

  qlms_quat_conj #(.W(W)) dut (.q, .q_conj);

  initial begin
    for (int n = 0; n < 200; n++) begin
      quat_t x, r;
      for (int i = 0; i < 4; i++) begin
        x[i] = rnd(16383);
        if (n % 2 == 0)
          case ($urandom_range(3))
            0: x[i] = -16384;
            1: x[i] = -16383;
            2: x[i] = 16383;
            default: x[i] = 0;
          endcase
      end
      r[0] = x[0];
      for (int i = 1; i < 4; i++) r[i] = (x[i] == -16384) ? 16383 : -x[i];
      q = (4*W)'(pack(x, W));
      #1;
      checks++;
      if (unpack(256'(q_conj), W) != r) begin
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
