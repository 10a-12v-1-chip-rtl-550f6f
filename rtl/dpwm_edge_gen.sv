`timescale 1ns/1ps
// dpwm_edge_gen: one edge channel of the hybrid DPWM ("delay line for
// generating a reset/set signal"). The counter is compared with the msb half
// of the edge command; the comparator output del_in is high for the whole
// clock period in which they are equal (and en is high). del_in runs down the
// delay line, and a 32:1 multiplexer picks tap lsb, so edge rises
// msb*Tclk + (lsb+1)*Tcell after the start of the period and stays high for
// one clock period. With Tcell = Tclk/32 that resolves the period into 1024
// steps from a 32-count clock. Comparator, delay line and tap multiplexer
// follow the source design; the enable input is this design's own, used to
// drop the D2 pulse when the dead-times leave no room for it.
module dpwm_edge_gen
  import dcdc_pkg::*;
#(
  parameter realtime T_CELL = 1.25ns
) (
  input  logic [CNT_BITS-1:0] cnt_out,
  input  logic [CNT_BITS-1:0] msb,
  input  logic [DL_BITS-1:0]  lsb,
  input  logic                en,
  output logic                edge_out
);
  logic               del_in;
  logic [N_TAPS-1:0]  taps;

  assign del_in = en && (cnt_out == msb);

  delay_line #(.N(N_TAPS), .T_CELL(T_CELL)) u_dl (
    .del_in (del_in),
    .tap    (taps)
  );

  assign edge_out = taps[lsb];
endmodule
