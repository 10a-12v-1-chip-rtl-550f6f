`timescale 1ns/1ps
// tb_adc_error_encoder: applies all 64 comparator patterns and checks that,
// one clock later, the error equals 3 minus the number of comparators that
// are high (thermometer codes give -3..+3 exactly, bubbles are tolerated).
module tb_adc_error_encoder;
  import dcdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [5:0] thermo = 0;
  err_t e;
  int checks = 0, failures = 0;

  adc_error_encoder dut (.clk(clk), .rst_n(rst_n), .thermo(thermo), .e(e));

  always #20 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // clean thermometer codes first: m lowest comparators high
    for (int m = 0; m <= 6; m++) begin
      @(negedge clk) thermo = 6'((1 << m) - 1);
      @(negedge clk);
      checks++;
      if (int'(e) != 3 - m) begin failures++; $display("FAIL m=%0d e=%0d", m, e); end
    end
    for (int p = 0; p < 64; p++) begin
      @(negedge clk) thermo = 6'(p);
      @(negedge clk);
      checks++;
      if (int'(e) != 3 - $countones(p)) begin failures++; $display("FAIL p=%b e=%0d", p, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
