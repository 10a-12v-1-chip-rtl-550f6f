`timescale 1ns/1ps
// adc_error_encoder: digital back end of the 6-comparator flash A/D.
// Comparator k (k = 0..5) is high when the output voltage lies above
// Vref + (k - 2.5) LSB, so the six outputs form a thermometer code. The number
// of comparators that are high, m (0..6), gives the error in LSB of the
// converter's reference minus its output: e = 3 - m, from +3 (output far below
// the reference) to -3 (far above); e = 0 means within half an LSB (5 mV).
// Counting ones instead of finding the top one makes a single flipped
// comparator ("bubble") cost at most one LSB. The seven levels follow the
// source design; the sign convention follows its block diagram (reference
// minus output); the code and the bubble handling are this design's own.
// The output is registered: e is valid one clk after thermo.
module adc_error_encoder
  import dcdc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_COMP-1:0] thermo,
  output err_t              e
);
  logic [2:0] ones;

  always_comb begin
    ones = '0;
    for (int k = 0; k < N_COMP; k++) ones += 3'(thermo[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) e <= '0;
    else        e <= err_t'(4'sd3 - $signed({1'b0, ones}));
  end
endmodule
