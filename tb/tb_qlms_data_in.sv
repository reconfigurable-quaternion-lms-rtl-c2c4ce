// tb_qlms_data_in: checks the input interface.  Random writes and takes;
// the held sample must be the last one written, and the registered overrun
// and underrun flags must pulse exactly when a pending sample is replaced
// before being taken, or a take finds no new sample.
module tb_qlms_data_in;
  localparam int W = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, take, in_taken, overrun, underrun;
  logic [3:0][W-1:0] x_in, d_in, x, d, mx, md;
  logic fresh, exp_ov, exp_un;
  int checks = 0, failures = 0, n_ov = 0, n_un = 0;

  qlms_data_in #(.W(W)) dut (.clk, .rst_n, .in_valid, .x_in, .d_in, .take,
                             .x, .d, .in_taken, .overrun, .underrun);

  initial begin
    in_valid = 0; take = 0; x_in = '0; d_in = '0;
    mx = '0; md = '0; fresh = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      in_valid = ($urandom_range(2) == 0);
      take     = ($urandom_range(3) == 0);
      x_in = (4*W)'({$urandom, $urandom});
      d_in = (4*W)'({$urandom, $urandom});
      #1;
      checks++;
      if (in_taken != take) failures++;
      @(posedge clk);
      exp_ov = in_valid && fresh && !take;
      exp_un = take && !fresh;
      if (in_valid) begin mx = x_in; md = d_in; fresh = 1; end
      else if (take) fresh = 0;
      @(negedge clk);
      checks += 3;
      if (x != mx || d != md) begin failures++; $display("FAIL data n=%0d", n); end
      if (overrun != exp_ov)  begin failures++; $display("FAIL overrun n=%0d", n); end
      if (underrun != exp_un) begin failures++; $display("FAIL underrun n=%0d", n); end
      if (overrun) n_ov++;
      if (underrun) n_un++;
    end
    checks++;
    if (n_ov == 0 || n_un == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
