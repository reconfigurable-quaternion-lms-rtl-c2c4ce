// qlms_data_in: input interface of the filter (DATA IN).
//
// Holds one pending sample, the filter input x and the desired value d,
// both quaternions in the filter's W-bit format.  A source writes a sample
// by pulsing in_valid; the filter takes the held sample on EN_X, once per
// sample period, and in_taken reports that.  The filter runs at a fixed
// rate, so the block only reports mismatches: overrun pulses when a new
// sample replaces one that was never taken, underrun pulses when the filter
// takes a sample that was already taken (it then reuses the old one).
// The original design names this block only as the port definition; the
// one-sample holding register and the two status pulses are this design's.
// Timing: a sample written in cycle t can be taken at an EN_X in cycle t+1
// or later; if in_valid and EN_X coincide, the filter takes the older
// sample and the new one waits.  overrun and underrun are registered: they
// pulse in the cycle after the event.
module qlms_data_in #(
  parameter int unsigned W = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [3:0][W-1:0] x_in,
  input  logic [3:0][W-1:0] d_in,
  input  logic              take,
  output logic [3:0][W-1:0] x,
  output logic [3:0][W-1:0] d,
  output logic              in_taken,
  output logic              overrun,
  output logic              underrun
);

  logic fresh;

  // Event flags are registered so that they never depend combinationally
  // on the source's in_valid.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x        <= '0;
      d        <= '0;
      fresh    <= 1'b0;
      overrun  <= 1'b0;
      underrun <= 1'b0;
    end else begin
      overrun  <= in_valid && fresh && !take;
      underrun <= take && !fresh;
      if (in_valid) begin
        x <= x_in;
        d <= d_in;
      end
      if (in_valid)  fresh <= 1'b1;
      else if (take) fresh <= 1'b0;
    end
  end

  assign in_taken = take;

endmodule
