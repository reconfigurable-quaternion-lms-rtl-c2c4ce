// tb_qlms_predict_formats: the prediction workload of tb_qlms_predict run
// with 8 taps at the data formats s2.8, s2.10, s2.12 and s2.14, four filters
// side by side on one clock.
//
// The original design was evaluated over this range of formats; accuracy
// is measured, as there, by the relative RMS difference between the
// fixed-point output and a double-precision filter fed the same data.
// Each filter is checked bit-exactly against the fixed-point model in
// tb_qlms_workload and must converge (error power below a tenth of the
// signal power).  The test then checks the trend: every two extra
// fraction bits must lower the relative RMS error, and s2.12 must stay
// below 2 %.  The per-format limits passed to the driver (20 % for s2.8,
// 5 % for s2.10) are this test's own.  mu = 0.05 for every format, so it
// is itself quantised more coarsely at s2.8.
module tb_qlms_predict_formats;
  localparam int  L      = 8;
  localparam int  N_FMT  = 4;
  localparam int  FRACS [N_FMT] = '{8, 10, 12, 14};
  localparam real LIMS  [N_FMT] = '{0.20, 0.05, 0.02, 0.02};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int  n_done = 0;
  int  checks_all [N_FMT];
  int  fails_all [N_FMT];
  real rrmse_all [N_FMT];

  for (genvar g = 0; g < N_FMT; g++) begin : g_fmt
    localparam int F = FRACS[g];
    localparam int W = 1 + 2 + F;

    logic [W-1:0]             mu;
    logic                     in_valid, in_taken, overrun, underrun, out_valid, done;
    logic [3:0][W-1:0]        x_in, d_in, y_out, e_out, x_last;
    logic [L-1:0][3:0][W-1:0] w_taps;
    int                       checks, failures;

    qlms_top #(.L(L), .INT_BITS(2), .FRAC_BITS(F)) dut (
      .clk, .rst_n, .mu, .in_valid, .x_in, .d_in, .in_taken, .overrun, .underrun,
      .y_out, .e_out, .out_valid, .x_last, .w_taps
    );

    tb_qlms_workload #(.L(L), .INT_BITS(2), .FRAC_BITS(F), .MODE(0), .MU(0.05),
                       .RRMSE_MAX(LIMS[g])) u_load (
      .clk, .rst_n, .mu, .in_valid, .x_in, .d_in, .in_taken,
      .y_out, .e_out, .out_valid, .done, .checks, .failures
    );

    initial begin
      wait (done);
      checks_all[g] = checks;
      fails_all[g]  = failures;
      rrmse_all[g]  = u_load.rrmse;
      $display("s2.%0d: rRMSE %0.3f %%, checks=%0d failures=%0d",
               F, 100.0 * rrmse_all[g], checks, failures);
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
    for (int g = 1; g < N_FMT; g++) begin
      checks++;
      if (!(rrmse_all[g] < rrmse_all[g-1])) begin
        failures++;
        $display("FAIL: rRMSE does not fall from s2.%0d to s2.%0d", FRACS[g-1], FRACS[g]);
      end
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
