// tb_qlms_predict_lengths: the prediction workload of tb_qlms_predict run on
// longer filters, L = 16, 32 and 64 taps at s2.12, three filters side by
// side on one clock.
//
// The original design was synthesised for these lengths; this test runs
// them.  The step size falls with the length, as a stable LMS filter
// requires: mu = 0.05 for 16 and 32 taps, 0.02 for 64 taps (0.05 diverges
// there).  These mu values are this test's own.  Each filter is checked
// bit-exactly against the fixed-point model in tb_qlms_workload; its
// output must stay within 3 % RMS of a double-precision filter, which is
// looser than the 2 % used at 8 taps, because truncation errors accumulate
// over more terms and smaller updates.  Its error power must converge
// below a tenth of the signal power.  Each filter's period is
// 19 + ceil(log2 L) cycles; the workload driver writes one sample per
// period and any later overrun or underrun counts as a failure.
module tb_qlms_predict_lengths;
  localparam int  W        = 1 + 2 + 12;
  localparam int  N_FILT   = 3;
  localparam int  LENS [N_FILT] = '{16, 32, 64};
  localparam real MUS  [N_FILT] = '{0.05, 0.05, 0.02};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int n_done = 0;
  int checks_all [N_FILT];
  int fails_all [N_FILT];

  for (genvar g = 0; g < N_FILT; g++) begin : g_len
    localparam int L = LENS[g];

    logic [W-1:0]             mu;
    logic                     in_valid, in_taken, overrun, underrun, out_valid, done;
    logic [3:0][W-1:0]        x_in, d_in, y_out, e_out, x_last;
    logic [L-1:0][3:0][W-1:0] w_taps;
    int                       checks, failures;
    int                       slips = 0, n_taken = 0;

    qlms_top #(.L(L)) dut (
      .clk, .rst_n, .mu, .in_valid, .x_in, .d_in, .in_taken, .overrun, .underrun,
      .y_out, .e_out, .out_valid, .x_last, .w_taps
    );

    tb_qlms_workload #(.L(L), .MODE(0), .MU(MUS[g]), .RRMSE_MAX(0.03)) u_load (
      .clk, .rst_n, .mu, .in_valid, .x_in, .d_in, .in_taken,
      .y_out, .e_out, .out_valid, .done, .checks, .failures
    );

    // The driver writes its first sample after the first take, so that take
    // underruns by design; slips are counted from the second take on.
    always @(negedge clk) begin
      if (in_taken) n_taken++;
      if (n_taken >= 2 && !done && (overrun || underrun)) slips++;
    end

    initial begin
      wait (done);
      checks_all[g] = checks + 1;
      fails_all[g]  = failures + ((slips != 0) ? 1 : 0);
      $display("L=%0d mu=%0.3f: checks=%0d failures=%0d", L, MUS[g], checks_all[g], fails_all[g]);
      n_done++;
    end
  end

  initial begin
    automatic int checks = 0, failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_done == N_FILT);
    for (int g = 0; g < N_FILT; g++) begin
      checks   += checks_all[g];
      failures += fails_all[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 1500 samples of at most 25 cycles each.
  initial begin
    repeat (45000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
