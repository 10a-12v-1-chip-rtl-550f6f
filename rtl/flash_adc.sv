`timescale 1ns/1ps
// flash_adc: behavioural model of the window flash A/D converter (analog
// part, not synthesizable logic in the real chip). Six clocked comparators
// compare the converter output voltage with thresholds placed symmetrically
// around the reference, Vref + (k - 2.5) LSB for k = 0..5, giving a 7-level
// quantisation of the error with a 10 mV LSB. The analog voltage is carried
// as a signed integer in microvolts (vout_uv) so that the model stays
// two-state and synthesis-neutral; the reference and the LSB are parameters.
// The comparators latch on the rising clk edge, so thermo follows vout_uv
// one clock later. Six comparators, 7 levels, 10 mV LSB and Vref = 1.3 V
// follow the source design; the clocked comparators and the threshold
// placement are this model's assumptions.
module flash_adc
  import dcdc_pkg::*;
#(
  parameter int VREF_UV = 1_300_000,
  parameter int LSB_UV  = 10_000
) (
  input  logic               clk,
  input  logic signed [31:0] vout_uv,
  output logic [N_COMP-1:0]  thermo
);
  always_ff @(posedge clk) begin
    for (int k = 0; k < N_COMP; k++) begin
      // threshold = Vref + (2k - 5) * LSB / 2
      thermo[k] <= (2 * (vout_uv - VREF_UV) > (2 * k - 5) * LSB_UV);
    end
  end
endmodule
