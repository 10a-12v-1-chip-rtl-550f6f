`timescale 1ns/1ps
// pid_compensator: discrete PID compensator built from look-up tables.
// It computes d[n] = d[n-1] + a*e[n] + b*e[n-1] + c*e[n-2], where e is the
// 7-level error from the flash A/D and d the 13-bit duty command (10 DPWM bits
// plus 3 dither bits). The three products come from pid_lut, so the update is
// three additions and needs no multiplier; that law and the table approach
// follow the source design.
// Timing (this design's choice): one update per switching period, on the clk
// edge where sample is high. e[n] is taken from e_in at that edge, the two
// older errors shift along, and duty holds the new d[n] from the next cycle
// on: a latency of one clock. The sum is saturated to [0, DUTY_MAX]; the
// default keeps the 10-bit pulse edge at or below step 991 (see
// deadtime_calc). While run is low the accumulator is held at d_init and the
// error history is cleared, which gives a defined start after the
// parameters have been loaded. Table writes pass straight to pid_lut.
module pid_compensator
  import dcdc_pkg::*;
#(
  parameter int DUTY_MAX = ((1 << DPWM_BITS) - (1 << DL_BITS) - 1) << DITHER_BITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  duty_t      d_init,
  input  logic       sample,
  input  err_t       e_in,
  input  logic       lut_we,
  input  lut_sel_t   lut_sel,
  input  logic [2:0] lut_idx,
  input  lut_word_t  lut_wdata,
  output duty_t      duty
);
  localparam int SUM_W = LUT_W + 3;

  err_t                    e1, e2;
  lut_word_t               pa, pb, pc;
  logic signed [SUM_W-1:0] sum;
  duty_t                   d_next;

  pid_lut u_lut (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (lut_we),
    .sel   (lut_sel),
    .idx   (lut_idx),
    .wdata (lut_wdata),
    .e0    (e_in),
    .e1    (e1),
    .e2    (e2),
    .pa    (pa),
    .pb    (pb),
    .pc    (pc)
  );

  always_comb begin
    sum = $signed({{(SUM_W-DUTY_BITS){1'b0}}, duty})
        + SUM_W'(pa) + SUM_W'(pb) + SUM_W'(pc);
    if (sum < 0)                        d_next = '0;
    else if (sum > SUM_W'(DUTY_MAX))    d_next = duty_t'(DUTY_MAX);
    else                                d_next = duty_t'(sum);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      duty <= '0;
      e1   <= '0;
      e2   <= '0;
    end else if (!run) begin
      duty <= (d_init > duty_t'(DUTY_MAX)) ? duty_t'(DUTY_MAX) : d_init;
      e1   <= '0;
      e2   <= '0;
    end else if (sample) begin
      duty <= d_next;
      e1   <= e_in;
      e2   <= e1;
    end
  end
endmodule
