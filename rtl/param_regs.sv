`timescale 1ns/1ps
// param_regs: register bank behind the serial port. It keeps the stored
// dead-times td1 and td2 (in DPWM steps of 1.25 ns), the duty command the
// compensator starts from (d_init, 13 bits) and the run bit, and turns writes
// to the table addresses into table writes for the PID compensator.
// Register map (this design's own; the source design only says that PID and
// dead-time parameters are loaded serially at start-up):
//   0x00-0x06  table A entry for e = -3..+3      0x20  td1
//   0x08-0x0E  table B entry                     0x21  td2
//   0x10-0x16  table C entry                     0x22  d_init
//   0x23       bit 0: run (closes the loop and enables the DPWM outputs)
// Writes to other addresses are ignored. Timing: registers update on the clk
// edge with wr_en high; lut_we is a combinational decode of the same write.
// Reset (synchronous, active low): run = 0, d_init = 0, td1 = td2 = TD_RESET,
// 12 steps or 15 ns, the dead-time used for the efficiency measurements.
module param_regs
  import dcdc_pkg::*;
#(
  parameter int TD_RESET = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [7:0]         wr_addr,
  input  logic [15:0]        wr_data,
  output logic [TD_BITS-1:0] td1,
  output logic [TD_BITS-1:0] td2,
  output duty_t              d_init,
  output logic               run,
  output logic               lut_we,
  output lut_sel_t           lut_sel,
  output logic [2:0]         lut_idx,
  output lut_word_t          lut_wdata
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      td1    <= TD_BITS'(TD_RESET);
      td2    <= TD_BITS'(TD_RESET);
      d_init <= '0;
      run    <= 1'b0;
    end else if (wr_en) begin
      case (wr_addr)
        ADDR_TD1:   td1    <= wr_data[TD_BITS-1:0];
        ADDR_TD2:   td2    <= wr_data[TD_BITS-1:0];
        ADDR_DINIT: d_init <= wr_data[DUTY_BITS-1:0];
        ADDR_CTRL:  run    <= wr_data[0];
        default: ;
      endcase
    end
  end

  always_comb begin
    lut_idx   = wr_addr[2:0];
    lut_wdata = lut_word_t'(wr_data);
    lut_we    = wr_en && (wr_addr[2:0] < 3'(ERR_LEVELS));
    unique case ({wr_addr[7:3], 3'b000})
      ADDR_LUT_A: lut_sel = LUT_A;
      ADDR_LUT_B: lut_sel = LUT_B;
      ADDR_LUT_C: lut_sel = LUT_C;
      default: begin
        lut_sel = LUT_A;
        lut_we  = 1'b0;
      end
    endcase
  end
endmodule
