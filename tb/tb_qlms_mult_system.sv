// tb_qlms_mult_system: checks the four shared multipliers.
// Random 17-bit signed operand pairs (and the extreme values) are streamed
// in one set per cycle; each product set is checked at the second clock edge after it is applied.
module tb_qlms_mult_system;
  import qlms_ref_pkg::*;
  localparam int WO = 17;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0][WO-1:0]   a, b;
  logic [3:0][2*WO-1:0] p;
  int checks = 0, failures = 0;
  quat_t ha [3], hb [3];

  qlms_mult_system #(.W_OP(WO)) dut (.clk, .rst_n, .a, .b, .p);

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      quat_t qa, qb, r;
      for (int i = 0; i < 4; i++) begin
        qa[i] = (n < 2) ? -(64'sd1 <<< (WO-1)) : rnd(65535);
        qb[i] = (n == 0) ? -(64'sd1 <<< (WO-1)) : (n == 1) ? (64'sd1 <<< (WO-1)) - 1 : rnd(65535);
      end
      a = (4*WO)'(pack(qa, WO));
      b = (4*WO)'(pack(qb, WO));
      ha[2] = ha[1]; ha[1] = ha[0]; ha[0] = qa;
      hb[2] = hb[1]; hb[1] = hb[0]; hb[0] = qb;
      @(negedge clk);
      if (n >= 1) begin
        for (int i = 0; i < 4; i++) r[i] = ha[1][i] * hb[1][i];
        checks++;
        if (unpack(256'(p), 2 * WO) != r) begin
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
