`timescale 1ns/1ps
// deadtime_calc: turns the per-period duty command and the two programmed
// dead-times into the three edge commands of the hybrid DPWM.
//   D1 on  : count zero (from the counter, no command needed)
//   D1 off : r1 = duty
//   D2 on  : s2 = duty + td1       (td1: dead time after D1 turns off)
//   D2 off : r2 = 1023 - td2       (td2: dead time before D1 turns on again)
// An edge channel fires (command + 1) delay steps into the period, so these
// values put D1 off at duty+1 steps, D2 on at duty+td1+1 and D2 off at
// 1024-td2 steps, i.e. "1 - td2" of the period: both dead-times come out as
// exactly td1 and td2 steps. The edge set (duty, duty+td1, 1-td2) follows the
// source design's timing diagram; the +1 offset, the limits and the D2 drop
// are this design's own. r1 is limited to MAX_EDGE (991, the last step
// before the counter's final period) so no D1 reset can spill over the period
// boundary; d2_en is cleared when duty+td1 would not precede 1-td2 or would
// exceed MAX_EDGE, and D2 then stays off for the period. Each edge pulse is
// one clock period long, so the D2 reset pulse of one period (near its end)
// lasts into the first clock period of the next; s2 is therefore raised to
// at least MIN_S2 = 32 steps, which only lengthens the first dead-time when
// duty + td1 < 32 (duties below 3 %). Purely combinational.
module deadtime_calc
  import dcdc_pkg::*;
#(
  parameter int MAX_EDGE = (1 << DPWM_BITS) - (1 << DL_BITS) - 1,
  parameter int MIN_S2   = 1 << DL_BITS
) (
  input  dpwm_word_t        duty,
  input  logic [TD_BITS-1:0] td1,
  input  logic [TD_BITS-1:0] td2,
  output edges_t            edges
);
  localparam int FULL = (1 << DPWM_BITS) - 1;

  logic [DPWM_BITS:0] s2_wide;
  logic [DPWM_BITS:0] r2_wide;

  always_comb begin
    s2_wide = {1'b0, duty} + {1'b0, td1};
    if (s2_wide < (DPWM_BITS+1)'(MIN_S2)) s2_wide = (DPWM_BITS+1)'(MIN_S2);
    r2_wide = (DPWM_BITS+1)'(FULL) - {1'b0, td2};

    edges.r1    = (duty > dpwm_word_t'(MAX_EDGE)) ? dpwm_word_t'(MAX_EDGE) : duty;
    edges.s2    = s2_wide[DPWM_BITS-1:0];
    edges.r2    = r2_wide[DPWM_BITS-1:0];
    edges.d2_en = (s2_wide < r2_wide) &&
                  (s2_wide <= (DPWM_BITS+1)'(MAX_EDGE)) &&
                  (duty <= dpwm_word_t'(MAX_EDGE));
  end
endmodule
