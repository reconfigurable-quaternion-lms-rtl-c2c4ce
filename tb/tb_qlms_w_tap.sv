// tb_qlms_w_tap: checks the W_TAP register: it clears on reset, keeps
// its value while en_w is low and takes the input at an edge with en_w.
module tb_qlms_w_tap;
  import qlms_ref_pkg::*;
  localparam int W = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en;
  logic [3:0][W-1:0] din, q;
  logic [3:0][W-1:0] model;
  int checks = 0, failures = 0, loads = 0;

  qlms_w_tap #(.W(W)) dut (.clk, .rst_n, .en_w(en), .new_w(din), .w(q));

  initial begin
    en = 1; din = (4*W)'(64'h1234_5678_9abc_def0);
    model = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (q != '0) failures++;          // reset value
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      en  = ($urandom_range(2) == 0);
      din = (4*W)'({$urandom, $urandom});
      @(posedge clk);
      if (en) begin model = din; loads++; end
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
    end
    checks++;
    if (loads == 0 || loads == 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
