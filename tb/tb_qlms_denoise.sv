// tb_qlms_denoise: workload test, denoising of 3-D rotation quaternions
// (10 dB SNR input noise) with 8 taps and step size 0.1, run at the data
// formats s4.10 and s4.12 side by side on one clock.
//
// The original design needed four integer bits for this task, because
// the noisy input exceeds the range of s2.12; both four-integer-bit
// formats it evaluated are run here.  Each filter is checked bit-exactly
// against the fixed-point model in tb_qlms_workload, must converge, and
// its output must be closer to the clean rotation than the noisy input.
// Its relative RMS difference from a double-precision filter must stay
// below 2 % (s4.12) or 5 % (s4.10), and must fall as fraction bits are
// added; these limits and mu = 0.1 are this test's own.  Any overrun or
// underrun at the end of the run counts as a failure.
module tb_qlms_denoise;
  localparam int  L      = 8;
  localparam int  N_FMT  = 2;
  localparam int  FRACS [N_FMT] = '{10, 12};
  localparam real LIMS  [N_FMT] = '{0.05, 0.02};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int  n_done = 0;
  int  checks_all [N_FMT];
  int  fails_all [N_FMT];
  real rrmse_all [N_FMT];

  for (genvar g = 0; g < N_FMT; g++) begin : g_fmt
    localparam int F = FRACS[g];
    localparam int W = 1 + 4 + F;

    logic [W-1:0]             mu;
    logic                     in_valid, in_taken, overrun, underrun, out_valid, done;
    logic [3:0][W-1:0]        x_in, d_in, y_out, e_out, x_last;
    logic [L-1:0][3:0][W-1:0] w_taps;
    int                       checks, failures;

    qlms_top #(.L(L), .INT_BITS(4), .FRAC_BITS(F)) dut (
      .clk, .rst_n, .mu, .in_valid, .x_in, .d_in, .in_taken, .overrun, .underrun,
      .y_out, .e_out, .out_valid, .x_last, .w_taps
    );

    tb_qlms_workload #(.L(L), .INT_BITS(4), .FRAC_BITS(F), .MODE(1), .MU(0.1),
                       .RRMSE_MAX(LIMS[g])) u_load (
      .clk, .rst_n, .mu, .in_valid, .x_in, .d_in, .in_taken,
      .y_out, .e_out, .out_valid, .done, .checks, .failures
    );

    initial begin
      wait (done);
      @(posedge clk);
      checks_all[g] = checks + 1;
      fails_all[g]  = failures + ((overrun || underrun) ? 1 : 0);
      rrmse_all[g]  = u_load.rrmse;
      $display("s4.%0d: rRMSE %0.3f %%, checks=%0d failures=%0d",
               F, 100.0 * rrmse_all[g], checks_all[g], fails_all[g]);
      n_done++;
    end
  end

  initial begin
    automatic int checks = 0, failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_done == N_FMT);
    for (int g = 0; g < N_FMT; g++) begin
      checks   += checks_all[g];
      failures += fails_all[g];
    end
    checks++;
    if (!(rrmse_all[1] < rrmse_all[0])) begin
      failures++;
      $display("FAIL: rRMSE does not fall from s4.10 to s4.12");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 1500 samples of 22 cycles.
  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
