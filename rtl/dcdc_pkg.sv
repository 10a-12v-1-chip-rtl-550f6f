`timescale 1ns/1ps
// dcdc_pkg: widths and constants shared by the digital buck-converter
// controller. The hybrid DPWM resolves one switching period into 2^10 steps:
// a 5-bit counter gives the coarse (msb) part and a 32-tap delay line the fine
// (lsb) part. Three further dither bits spread one extra step over 8 periods,
// so the compensator works on a 13-bit duty command. The flash A/D has six
// comparators, so the error takes seven values, -3..+3 LSB of 10 mV.
// The 10-bit/5+5 split, the 1/8 dither, the six comparators and the 10 mV LSB
// follow the source design; the table-entry width and the serial register map
// are this implementation's own choices.
package dcdc_pkg;
  localparam int CNT_BITS    = 5;                     // coarse counter bits
  localparam int DL_BITS     = 5;                     // delay-line bits
  localparam int DPWM_BITS   = CNT_BITS + DL_BITS;    // 10-bit DPWM
  localparam int N_TAPS      = 1 << DL_BITS;          // 32 delay cells
  localparam int DITHER_BITS = 3;                     // 1/8 dither
  localparam int DUTY_BITS   = DPWM_BITS + DITHER_BITS; // 13-bit command
  localparam int N_COMP      = 6;                     // flash A/D comparators
  localparam int ERR_BITS    = 3;                     // signed -3..+3
  localparam int ERR_LEVELS  = N_COMP + 1;            // 7 levels
  localparam int LUT_W       = 16;                    // table entry width
  localparam int TD_BITS     = DPWM_BITS;             // dead-time, DPWM steps

  typedef logic [DPWM_BITS-1:0]      dpwm_word_t;
  typedef logic [DUTY_BITS-1:0]      duty_t;
  typedef logic signed [ERR_BITS-1:0] err_t;
  typedef logic signed [LUT_W-1:0]   lut_word_t;

  // Which of the three product tables of the PID law a write goes to.
  typedef enum logic [1:0] {LUT_A = 2'd0, LUT_B = 2'd1, LUT_C = 2'd2} lut_sel_t;

  // Edge commands of one switching period, each split into msb/lsb halves
  // by the DPWM edge channels.
  typedef struct packed {
    dpwm_word_t r1;     // D1 off   : duty
    dpwm_word_t s2;     // D2 on    : duty + td1
    dpwm_word_t r2;     // D2 off   : 1 - td2 (modulo one period)
    logic       d2_en;  // D2 pulses this period
  } edges_t;

  // Serial register map (8-bit address, 16-bit data).
  localparam logic [7:0] ADDR_LUT_A = 8'h00;  // 0x00..0x06, e = -3..+3
  localparam logic [7:0] ADDR_LUT_B = 8'h08;  // 0x08..0x0E
  localparam logic [7:0] ADDR_LUT_C = 8'h10;  // 0x10..0x16
  localparam logic [7:0] ADDR_TD1   = 8'h20;
  localparam logic [7:0] ADDR_TD2   = 8'h21;
  localparam logic [7:0] ADDR_DINIT = 8'h22;
  localparam logic [7:0] ADDR_CTRL  = 8'h23;  // bit 0: run
endpackage
