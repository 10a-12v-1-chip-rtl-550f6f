`timescale 1ns/1ps
// delay_line: behavioural model of the DPWM delay line (not synthesizable).
// The real part is a chain of N_TAPS identical current-starved delay cells,
// Del0..Del31, whose delay is set by a bias current so that the whole chain
// spans one clock period. Each cell output is tapped: tap[k] (i<k> in the
// source design) is del_in delayed by (k+1) cell delays. The model assumes the
// bias loop has settled, so every cell delays by the constant T_CELL; the
// default, 1.25 ns, is the 40 ns period of the 25 MHz clock split into 32.
// A different clock (16.7 or 40 MHz) is modelled by overriding T_CELL.
// Transport delay is used, so pulses longer than one cell pass unchanged.
// tap starts low; its first value follows del_in after one cell delay.
module delay_line
  import dcdc_pkg::*;
#(
  parameter int      N = N_TAPS,
  parameter realtime T_CELL = 1.25ns
) (
  input  logic         del_in,
  output logic [N-1:0] tap
);
  initial tap = '0;

  always @(del_in) tap[0] <= #(T_CELL) del_in;

  for (genvar k = 1; k < N; k++) begin : g_cell
    always @(tap[k-1]) tap[k] <= #(T_CELL) tap[k-1];
  end
endmodule
