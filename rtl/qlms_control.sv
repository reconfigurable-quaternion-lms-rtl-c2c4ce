// qlms_control: the CONTROL BLOCK, the sequencer of the quaternion LMS filter.
//
// A counter runs from 0 to COUNT = Delay_L + 2 and wraps, so one sample
// period lasts COUNT + 1 = FIXED_DELAY + ceil(log2(L)) + 3 cycles (22 for
// L = 8, as in the original design), with
//   Delay_L = FIXED_DELAY + ceil(log2(L))                 Eq. (7)
// The counter value is compared with Delay_L through a register, which
// gives EN_W in cycle T_W = Delay_L + 1 (weights loaded); EN_W delayed once
// more gives EN_X in cycle T_X = Delay_L + 2 (samples shifted), the last
// cycle of the period.  Two ROMs addressed by the counter, with registered
// outputs, produce SEL_PROD (ROM1) and SEL_MULT (ROM2).  All of this
// follows the original design.
//
// The ROM contents are derived here from this RTL's pipeline (the printed
// ROM tables do not fit one counter period).  With S = ceil(log2(L)) and
// PH2 = PROD_LATENCY + S + ERROR_LATENCY = S + 8 the cycle at which the
// update phase starts:
//   SEL_PROD = SEL_WX in cycles 0 .. PH2-1, SEL_XE in cycles PH2 .. COUNT
//   SEL_MULT = 1 in cycles 2, 3, PH2+2, PH2+3, and 0 otherwise,
// i.e. ROM2 = [0,1,1, zeros, 0,1,1, zeros] with the second triple starting
// at address PH2, in the shape of the original table.  The weight update
// is ready at PH2 + PROD_LATENCY + UPDATE_LATENCY = S + 17 = T_W, which is
// why FIXED_DELAY must equal 2*PROD_LATENCY + 2 = 16.
module qlms_control
  import qlms_pkg::*;
#(
  parameter int unsigned L           = 8,
  parameter int unsigned FIXED_DELAY = 16,
  localparam int unsigned S       = tree_stages(L),
  localparam int unsigned DELAY_L = FIXED_DELAY + S,
  localparam int unsigned COUNT   = DELAY_L + 2,
  localparam int unsigned PERIOD  = COUNT + 1,
  localparam int unsigned CW      = $clog2(PERIOD)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          en_x,
  output logic          en_w,
  output sel_prod_e     sel_prod,
  output sel_mult_e     sel_mult
);

  localparam int unsigned PH2 = PROD_LATENCY + S + ERROR_LATENCY;

  if (FIXED_DELAY != 2 * PROD_LATENCY + ERROR_LATENCY + UPDATE_LATENCY - 1) begin : g_chk
    $error("qlms_control: FIXED_DELAY does not match the datapath latency");
  end

  // ROM1[a] is the SEL_PROD value for cycle (a + 1) mod PERIOD.
  function automatic logic [PERIOD-1:0] rom1_init();
    logic [PERIOD-1:0] r;
    for (int unsigned a = 0; a < PERIOD; a++)
      r[a] = (((a + 1) % PERIOD) >= PH2);
    return r;
  endfunction

  // ROM2[a] is the SEL_MULT value for cycle (a + 1) mod PERIOD.
  function automatic logic [PERIOD-1:0] rom2_init();
    logic [PERIOD-1:0] r;
    for (int unsigned a = 0; a < PERIOD; a++)
      r[a] = (a == 1) || (a == 2) || (a == PH2 + 1) || (a == PH2 + 2);
    return r;
  endfunction

  localparam logic [PERIOD-1:0] ROM1 = rom1_init();
  localparam logic [PERIOD-1:0] ROM2 = rom2_init();

  logic [CW-1:0] count;
  logic          cmp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      cmp_q    <= 1'b0;
      en_x     <= 1'b0;
      sel_prod <= SEL_WX;
      sel_mult <= SEL_RAW;
    end else begin
      count    <= (count == CW'(COUNT)) ? '0 : count + 1'b1;
      cmp_q    <= (count == CW'(DELAY_L));
      en_x     <= cmp_q;
      sel_prod <= sel_prod_e'(ROM1[count]);
      sel_mult <= sel_mult_e'(ROM2[count]);
    end
  end

  assign en_w = cmp_q;

  // The ROMs wrap with the counter: the reset values are those of cycle 0.
  initial begin
    assert (ROM1[PERIOD-1] == 1'b0 && ROM2[PERIOD-1] == 1'b0)
      else $error("qlms_control: ROM contents do not start a period at reset");
  end

endmodule
