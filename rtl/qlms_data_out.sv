// qlms_data_out: output interface of the filter (DATA OUT).
//
// Presents the filter output y(n) (SUM_OUT of the adder tree) and the error
// e(n) once per sample period.  The finished sum leaves the adder tree in
// the last cycle before the update phase (SEL_PROD = SEL_XE); a one-cycle
// delay register keeps it, and at the end of the first update-phase cycle
// y_out and e_out are loaded and out_valid pulses for one cycle.  y is
// saturated to the W-bit data format.  The original design names this
// block only as the port definition; the valid pulse and the saturation are this design's.
// Timing: out_valid is high in the second cycle of the update phase;
// y_out and e_out then hold until the next pulse.
module qlms_data_out
  import qlms_pkg::*;
#(
  parameter int unsigned W  = 15,
  parameter int unsigned YW = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  input  sel_prod_e          sel_prod,
  input  logic [3:0][YW-1:0] y,
  input  logic [3:0][W-1:0]  e,
  output logic [3:0][W-1:0]  y_out,
  output logic [3:0][W-1:0]  e_out,
  output logic               out_valid
);

  logic [3:0][YW-1:0] y_hold;
  sel_prod_e          sel_q;
  logic               phase_start;

  assign phase_start = (sel_prod == SEL_XE) && (sel_q == SEL_WX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_hold    <= '0;
      sel_q     <= SEL_WX;
      y_out     <= '0;
      e_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      sel_q     <= sel_prod;
      out_valid <= phase_start;
      y_hold    <= y;
      if (phase_start) begin
        for (int i = 0; i < 4; i++)
          y_out[i] <= W'(sat_to(64'(signed'(y_hold[i])), W));
        e_out <= e;
      end
    end
  end

endmodule
