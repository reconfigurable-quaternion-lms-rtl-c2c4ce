// tb_qlms_predict: workload test, 10-step-ahead prediction of a rotated 3-D position, with the filter at its defaults (8 taps, s2.12).
// See tb_qlms_workload for the data and the checks.
module tb_qlms_predict;
  localparam int L = 8;
  localparam int W = 1 + 2 + 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]             mu;
  logic                     in_valid, in_taken, overrun, underrun, out_valid, done;
  logic [3:0][W-1:0]        x_in, d_in, y_out, e_out, x_last;
  logic [L-1:0][3:0][W-1:0] w_taps;
  int                       checks, failures;

  qlms_top dut (
    .clk, .rst_n, .mu, .in_valid, .x_in, .d_in, .in_taken, .overrun, .underrun,
    .y_out, .e_out, .out_valid, .x_last, .w_taps
  );

  tb_qlms_workload #(.L(L), .MODE(0), .MU(0.05)) u_load (
    .clk, .rst_n, .mu, .in_valid, .x_in, .d_in, .in_taken,
    .y_out, .e_out, .out_valid, .done, .checks, .failures
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    @(posedge clk);
    checks++;
    if (overrun || underrun) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 1500 samples of 22 cycles.
  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
