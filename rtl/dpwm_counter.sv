`timescale 1ns/1ps
// dpwm_counter: coarse time base of the hybrid DPWM.
// A free-running CNT_BITS-bit counter advances on every rising clk edge, so a
// switching period lasts 2^CNT_BITS clock periods (32 x 40 ns = 1.28 us, about
// 780 kHz at 25 MHz). cnt_out feeds the msb comparators of the edge channels.
// s1 is high while the count is zero; it sets the high-side latch D1 at the
// start of every period, as in the source design. frame is this design's own
// addition: it is high during the last count of a period (all ones), and the
// period's commands are loaded on the clk edge that ends it, so new values
// take effect exactly at count zero. sample, also this design's own, is high
// at count SAMPLE_AT (29 by default): the compensator takes the A/D error
// then, so its result is ready before frame and the loop delay is a few
// clocks rather than a whole period. Synchronous active-low reset to zero.
module dpwm_counter
  import dcdc_pkg::*;
#(
  parameter int W         = CNT_BITS,
  parameter int SAMPLE_AT = (1 << W) - 3
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] cnt_out,
  output logic         s1,
  output logic         frame,
  output logic         sample
);
  always_ff @(posedge clk) begin
    if (!rst_n) cnt_out <= '0;
    else        cnt_out <= cnt_out + 1'b1;
  end

  assign s1    = (cnt_out == '0);
  assign frame  = (cnt_out == '1);
  assign sample = (cnt_out == W'(SAMPLE_AT));
endmodule
