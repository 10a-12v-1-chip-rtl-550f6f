`timescale 1ns/1ps
// tb_dpwm_counter: checks the 5-bit DPWM counter against a reference count:
// cnt_out, s1 (count zero), sample (count 29) and frame (count all ones) on
// every cycle, and
// that a switching period is exactly 32 clocks.
module tb_dpwm_counter;
  logic clk = 0, rst_n = 0;
  logic [4:0] cnt_out;
  logic s1, frame, sample;
  int checks = 0, failures = 0;
  int ref_cnt, last_s1, periods;

  dpwm_counter dut (.clk(clk), .rst_n(rst_n), .cnt_out(cnt_out), .s1(s1), .frame(frame), .sample(sample));

  always #20 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ref_cnt = 0; last_s1 = -1; periods = 0;
    @(posedge clk);
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      ref_cnt = (ref_cnt + 1) % 32;
      check(cnt_out == 5'(ref_cnt), "count");
      check(s1 == (ref_cnt == 0), "s1");
      check(frame == (ref_cnt == 31), "frame");
      check(sample == (ref_cnt == 29), "sample");
      if (s1) begin
        if (last_s1 >= 0) begin check(cyc - last_s1 == 32, "period 32 clocks"); periods++; end
        last_s1 = cyc;
      end
    end
    check(periods >= 5, "periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
