`timescale 1ns/1ps
// tb_flash_adc: sweeps the sensed voltage around 1.3 V and checks each of
// the six comparators against its threshold Vref + (k - 2.5) x 10 mV, one
// clock after the voltage is applied, including points just either side of
// every threshold.
module tb_flash_adc;
  logic clk = 0;
  logic signed [31:0] v = 1_300_000;
  logic [5:0] thermo;
  int checks = 0, failures = 0;

  flash_adc dut (.clk(clk), .vout_uv(v), .thermo(thermo));

  always #20 clk = ~clk;

  task automatic apply(input int uv);
    logic [5:0] expd;
    @(negedge clk) v = uv;
    @(negedge clk);
    for (int k = 0; k < 6; k++) expd[k] = (uv > 1_300_000 - 25_000 + 10_000 * k);
    checks++;
    if (thermo != expd) begin failures++; $display("FAIL v=%0d thermo=%b exp=%b", uv, thermo, expd); end
  endtask

  initial begin
    for (int k = 0; k < 6; k++) begin
      apply(1_275_000 + 10_000 * k - 1);
      apply(1_275_000 + 10_000 * k + 1);
    end
    for (int uv = 1_200_000; uv <= 1_400_000; uv += 2_500) apply(uv);
    for (int i = 0; i < 100; i++) apply(1_250_000 + $urandom_range(0, 100_000));
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
