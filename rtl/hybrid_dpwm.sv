`timescale 1ns/1ps
// hybrid_dpwm: 10-bit hybrid digital pulse-width modulator with programmable
// dead-times, the core of the converter controller.
// A 5-bit counter (dpwm_counter) divides the period into 32 clock periods and a
// 32-cell delay line divides each clock period into 32 steps, so a 25 MHz
// clock gives 1024 steps of 1.25 ns per 1.28 us switching period; a plain
// counter would need an 800 MHz clock for the same resolution. Three edge
// channels (dpwm_edge_gen), each a comparator, a delay line and a 32:1 tap
// multiplexer, produce R1 (D1 off), S2 (D2 on) and R2 (D2 off); S1, the
// counter at zero, turns D1 on. Two SR latches hold D1 (high-side switch) and
// D2 (low-side switch). deadtime_calc derives the three edge commands from
// duty, td1 and td2.
// Interface: duty, td1, td2 and en are sampled on the clk edge that ends a
// period (frame high) and hold for the whole next period; this double
// buffering is this design's own choice, as is en, which holds both outputs
// off while low. frame is the "clock signal" output that paces the
// controller: one clk cycle per switching period. sample marks the clock
// (count 29) at which the controller should take its A/D sample.
// Timing: D1 rises with the clk edge that brings the count to zero and falls
// (duty+1) steps later; D2 rises td1 steps after D1 falls and falls td2 steps
// before the next D1 rise.
module hybrid_dpwm
  import dcdc_pkg::*;
#(
  parameter realtime T_CELL = 1.25ns
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  dpwm_word_t         duty,
  input  logic [TD_BITS-1:0] td1,
  input  logic [TD_BITS-1:0] td2,
  output logic               d1,
  output logic               d2,
  output logic               frame,
  output logic               sample,
  output logic [CNT_BITS-1:0] cnt_out
);
  logic   s1, r1, s2, r2;
  logic   en_q, latch_rst_n;
  edges_t edges_next, edges_q;

  dpwm_counter #(.W(CNT_BITS)) u_cnt (
    .clk     (clk),
    .rst_n   (rst_n),
    .cnt_out (cnt_out),
    .s1      (s1),
    .frame   (frame),
    .sample  (sample)
  );

  deadtime_calc u_dt (
    .duty  (duty),
    .td1   (td1),
    .td2   (td2),
    .edges (edges_next)
  );

  // Period buffer: commands change only at the period boundary.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      edges_q <= '{r1: '0, s2: '0, r2: '1, d2_en: 1'b0};
      en_q    <= 1'b0;
    end else if (frame) begin
      edges_q <= edges_next;
      en_q    <= en;
    end
  end

  dpwm_edge_gen #(.T_CELL(T_CELL)) u_r1 (
    .cnt_out  (cnt_out),
    .msb      (edges_q.r1[DPWM_BITS-1 -: CNT_BITS]),
    .lsb      (edges_q.r1[DL_BITS-1:0]),
    .en       (1'b1),
    .edge_out (r1)
  );

  dpwm_edge_gen #(.T_CELL(T_CELL)) u_s2 (
    .cnt_out  (cnt_out),
    .msb      (edges_q.s2[DPWM_BITS-1 -: CNT_BITS]),
    .lsb      (edges_q.s2[DL_BITS-1:0]),
    .en       (edges_q.d2_en),
    .edge_out (s2)
  );

  dpwm_edge_gen #(.T_CELL(T_CELL)) u_r2 (
    .cnt_out  (cnt_out),
    .msb      (edges_q.r2[DPWM_BITS-1 -: CNT_BITS]),
    .lsb      (edges_q.r2[DL_BITS-1:0]),
    .en       (1'b1),
    .edge_out (r2)
  );

  assign latch_rst_n = rst_n && en_q;

  sr_latch u_d1 (.rst_n(latch_rst_n), .s(s1), .r(r1), .q(d1));
  sr_latch u_d2 (.rst_n(latch_rst_n), .s(s2), .r(r2), .q(d2));

  // The two switches must never be commanded on together.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(d1 && d2));
endmodule
