`timescale 1ns/1ps
// tb_dither: for every fraction k = 0..7 and several integer parts, checks
// over 8 consecutive frames that the output is the integer part in 8-k of
// them and one more in k of them, so the 8-period mean equals duty/8.
// Also checks that the spread is even for k = 4 (alternate periods) and that
// the output saturates at 1023.
module tb_dither;
  logic clk = 0, rst_n = 0, frame = 0;
  logic [12:0] duty_in = 0;
  logic [9:0] duty_out;
  int checks = 0, failures = 0;

  dither dut (.clk(clk), .rst_n(rst_n), .frame(frame), .duty_in(duty_in), .duty_out(duty_out));

  always #20 clk = ~clk;

  task automatic window(input int whole, input int k);
    int sum, n_long; logic [9:0] seq [8];
    duty_in = 13'(whole * 8 + k);
    sum = 0; n_long = 0;
    for (int p = 0; p < 8; p++) begin
      @(negedge clk);
      seq[p] = duty_out;
      if (duty_out == 10'(whole + 1)) n_long++;
      else if (duty_out != 10'(whole)) begin failures++; $display("FAIL value %0d for %0d", duty_out, whole); end
      frame = 1;
      @(negedge clk);
      frame = 0;
    end
    checks++;
    if (n_long != k) begin failures++; $display("FAIL whole=%0d k=%0d long=%0d", whole, k, n_long); end
    if (k == 4) begin
      checks++;
      for (int p = 0; p < 8; p += 2)
        if (seq[p] == seq[p+1]) begin failures++; $display("FAIL k=4 not alternating"); break; end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      window(111, k);
      window(0, k);
      window($urandom_range(1, 1000), k);
    end
    // saturation at the top of the range
    duty_in = 13'h1FFF;
    for (int p = 0; p < 8; p++) begin
      @(negedge clk);
      checks++;
      if (duty_out != 10'd1023) failures++;
      frame = 1; @(negedge clk); frame = 0;
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
