`timescale 1ns/1ps
// dither: digital dither that adds DITHER_BITS of resolution to the DPWM.
// The 13-bit duty command is split into a 10-bit integer part and a 3-bit
// fraction k. Over every 8 switching periods the pulse is made one DPWM step
// longer in exactly k of them; the LC filter averages the train, so the mean
// duty moves in 1/8-step increments (1.25 ns / 8 here). The technique and the
// 1/8 figure follow the source design; which periods get the extra step is
// this design's choice: a 3-bit period counter is bit-reversed and compared
// with k, which spreads the long pulses evenly (k = 4 gives every other one).
// Interface: frame advances the period counter (one pulse per switching
// period); duty_out is combinational and is sampled by the DPWM on that same
// frame edge. The integer part saturates at the top of its range.
module dither
  import dcdc_pkg::*;
#(
  parameter int IN_BITS  = DUTY_BITS,
  parameter int FRAC     = DITHER_BITS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      frame,
  input  logic [IN_BITS-1:0]        duty_in,
  output logic [IN_BITS-FRAC-1:0]   duty_out
);
  localparam int OUT_BITS = IN_BITS - FRAC;

  logic [FRAC-1:0]     phase, phase_rev;
  logic [OUT_BITS-1:0] whole;
  logic [FRAC-1:0]     k;
  logic                bump;

  always_ff @(posedge clk) begin
    if (!rst_n)     phase <= '0;
    else if (frame) phase <= phase + 1'b1;
  end

  always_comb begin
    for (int i = 0; i < FRAC; i++) phase_rev[i] = phase[FRAC-1-i];
    whole = duty_in[IN_BITS-1:FRAC];
    k     = duty_in[FRAC-1:0];
    bump  = (phase_rev < k);
    duty_out = (bump && whole != '1) ? whole + 1'b1 : whole;
  end
endmodule
