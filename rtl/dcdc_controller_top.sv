`timescale 1ns/1ps
// dcdc_controller_top: digital controller of a 12 V to 1.3 V, 10 A
// synchronous buck converter. Once per switching period (32 clocks, 1.28 us at
// 25 MHz) the output voltage is quantised by a 6-comparator window A/D
// (flash_adc, adc_error_encoder) into a 7-level error; a look-up-table PID
// (pid_compensator) updates a 13-bit duty command; the digital dither turns
// that into a 10-bit pulse width for each period; and the hybrid DPWM drives
// the high-side switch (d1) and the low-side switch (d2) with programmable
// dead-times td1/td2. PID tables, dead-times, the start duty and the run bit
// are written over the serial port (serial_param_if, param_regs).
// Ports: vout_uv is the sensed output voltage in microvolts (from the LC
// filter); d1/d2 go to the level shifter and gate drivers of the power
// switches, which are outside this logic; frame is the DPWM's one-clock-per-
// period pacing pulse. cnt_out (DPWM counter), duty_cmd and err are brought
// out for observation.
// The chain and its blocks follow the source design; the pipeline timing is
// this design's choice: the comparators latch every clock, the encoder
// registers the error, the compensator takes it at count 29 of the period
// (DPWM sample pulse), and the new pulse width starts at the next count zero,
// so a sample reaches the switches about 5 clocks (0.2 us) later.
module dcdc_controller_top
  import dcdc_pkg::*;
#(
  parameter realtime T_CELL  = 1.25ns,
  parameter int      VREF_UV = 1_300_000,
  parameter int      LSB_UV  = 10_000
) (
  input  logic               clk,
  input  logic               rst_n,
  // serial parameter port
  input  logic               sclk,
  input  logic               cs_n,
  input  logic               mosi,
  // sensed output voltage
  input  logic signed [31:0] vout_uv,
  // gate-drive commands
  output logic               d1,
  output logic               d2,
  output logic               frame,
  // observation
  output logic [CNT_BITS-1:0] cnt_out,
  output duty_t              duty_cmd,
  output err_t               err
);
  logic              wr_en;
  logic [7:0]        wr_addr;
  logic [15:0]       wr_data;
  logic [TD_BITS-1:0] td1, td2;
  duty_t             d_init;
  logic              run;
  logic              lut_we;
  lut_sel_t          lut_sel;
  logic [2:0]        lut_idx;
  lut_word_t         lut_wdata;
  logic [N_COMP-1:0] thermo;
  dpwm_word_t        duty_period;
  logic              sample;

  serial_param_if #(.ADDR_W(8), .DATA_W(16)) u_spi (
    .clk (clk), .rst_n (rst_n),
    .sclk (sclk), .cs_n (cs_n), .mosi (mosi),
    .wr_en (wr_en), .wr_addr (wr_addr), .wr_data (wr_data)
  );

  param_regs u_regs (
    .clk (clk), .rst_n (rst_n),
    .wr_en (wr_en), .wr_addr (wr_addr), .wr_data (wr_data),
    .td1 (td1), .td2 (td2), .d_init (d_init), .run (run),
    .lut_we (lut_we), .lut_sel (lut_sel), .lut_idx (lut_idx),
    .lut_wdata (lut_wdata)
  );

  flash_adc #(.VREF_UV(VREF_UV), .LSB_UV(LSB_UV)) u_adc (
    .clk (clk), .vout_uv (vout_uv), .thermo (thermo)
  );

  adc_error_encoder u_enc (
    .clk (clk), .rst_n (rst_n), .thermo (thermo), .e (err)
  );

  pid_compensator u_pid (
    .clk (clk), .rst_n (rst_n), .run (run), .d_init (d_init),
    .sample (sample), .e_in (err),
    .lut_we (lut_we), .lut_sel (lut_sel), .lut_idx (lut_idx),
    .lut_wdata (lut_wdata),
    .duty (duty_cmd)
  );

  dither u_dither (
    .clk (clk), .rst_n (rst_n), .frame (frame),
    .duty_in (duty_cmd), .duty_out (duty_period)
  );

  hybrid_dpwm #(.T_CELL(T_CELL)) u_dpwm (
    .clk (clk), .rst_n (rst_n), .en (run),
    .duty (duty_period), .td1 (td1), .td2 (td2),
    .d1 (d1), .d2 (d2), .frame (frame), .sample (sample), .cnt_out (cnt_out)
  );
endmodule
