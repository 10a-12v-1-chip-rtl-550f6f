`timescale 1ns/1ps
// pid_lut: the three product tables of the look-up-table PID compensator.
// Because the flash A/D error takes only seven values (-3..+3), the products
// a*e, b*e and c*e of the PID law are precomputed off chip and stored here,
// one 16-bit signed entry per error value and table (3 x 7 entries), so the
// compensator needs no multiplier. That table idea follows the source design;
// the entry width and the write port are this design's own choices.
// Write port: on a clk edge with we high, entry idx (0..6, meaning
// e = idx-3) of table sel is written. Read ports: three asynchronous reads,
// table A at e0 = e[n], table B at e1 = e[n-1], table C at e2 = e[n-2].
// Entries reset to zero (synchronous, active low).
module pid_lut
  import dcdc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      we,
  input  lut_sel_t  sel,
  input  logic [2:0] idx,
  input  lut_word_t wdata,
  input  err_t      e0,
  input  err_t      e1,
  input  err_t      e2,
  output lut_word_t pa,
  output lut_word_t pb,
  output lut_word_t pc
);
  lut_word_t tab_a [ERR_LEVELS];
  lut_word_t tab_b [ERR_LEVELS];
  lut_word_t tab_c [ERR_LEVELS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ERR_LEVELS; i++) begin
        tab_a[i] <= '0;
        tab_b[i] <= '0;
        tab_c[i] <= '0;
      end
    end else if (we && idx < 3'(ERR_LEVELS)) begin
      case (sel)
        LUT_A:   tab_a[idx] <= wdata;
        LUT_B:   tab_b[idx] <= wdata;
        LUT_C:   tab_c[idx] <= wdata;
        default: ;
      endcase
    end
  end

  // Error e maps to entry e + 3.
  function automatic logic [2:0] slot(input err_t e);
    return 3'(e + 3'sd3);
  endfunction

  assign pa = tab_a[slot(e0)];
  assign pb = tab_b[slot(e1)];
  assign pc = tab_c[slot(e2)];
endmodule
