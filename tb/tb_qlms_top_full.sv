// tb_qlms_top_full: end-to-end test of the quaternion LMS filter, every parameter of the filter at its default (8 taps, s2.12).
//
// tb_qlms_harness feeds samples from a known quaternion FIR system, checks
// every output, every weight and the delay line against a sample-accurate
// model, checks the sample period and output latency, that the filter
// converges, and that each control mechanism was exercised.
module tb_qlms_top_full;
  import qlms_pkg::*;

  localparam int L = 8;
  localparam int W = 15;

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

  tb_qlms_harness #(.L(L), .N_SAMPLES(400)) u_harness (
    .clk, .rst_n, .mu, .in_valid, .x_in, .d_in, .in_taken, .overrun, .underrun,
    .y_out, .e_out, .out_valid, .x_last, .w_taps,
    .sel_prod(dut.sel_prod == SEL_XE), .sel_mult(dut.sel_mult == SEL_HADA),
    .en_w(dut.en_w), .done, .checks, .failures
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 400 samples take under 10000 cycles.
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
