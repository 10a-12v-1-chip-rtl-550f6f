`timescale 1ns/1ps
// tb_dpwm_clock_sweep: runs the hybrid DPWM at the three clock frequencies
// 16.7, 25 and 40 MHz, each with its delay line set to Tclk/32 per cell, and
// checks that the step, the switching period and the dead-times all scale
// with the clock: for the 00101_00001 command D1 must be on for
// 5 x Tclk + 2 x Tclk/32, the period must be 32 x Tclk, and a 12-step dead-time
// must last 12 x Tclk/32. It also reports the step size at each clock.
module tb_dpwm_clock_sweep;
  import dcdc_pkg::*;
  int checks = 0, failures = 0;

  // one DPWM per clock frequency; periods in ns
  localparam real TCLK [3] = '{60.0, 40.0, 25.0};
  logic [2:0] clk = '0, d1, d2, frame, sample;
  logic rst_n = 0;
  logic [4:0] cnt [3];

  always #(TCLK[0] / 2) clk[0] = ~clk[0];
  always #(TCLK[1] / 2) clk[1] = ~clk[1];
  always #(TCLK[2] / 2) clk[2] = ~clk[2];

  hybrid_dpwm #(.T_CELL(60.0ns / 32)) u_f16 (.clk(clk[0]), .rst_n(rst_n), .en(1'b1), .duty(10'b00101_00001),
    .td1(10'd12), .td2(10'd12), .d1(d1[0]), .d2(d2[0]), .frame(frame[0]), .sample(sample[0]), .cnt_out(cnt[0]));
  hybrid_dpwm #(.T_CELL(40.0ns / 32)) u_f25 (.clk(clk[1]), .rst_n(rst_n), .en(1'b1), .duty(10'b00101_00001),
    .td1(10'd12), .td2(10'd12), .d1(d1[1]), .d2(d2[1]), .frame(frame[1]), .sample(sample[1]), .cnt_out(cnt[1]));
  hybrid_dpwm #(.T_CELL(25.0ns / 32)) u_f40 (.clk(clk[2]), .rst_n(rst_n), .en(1'b1), .duty(10'b00101_00001),
    .td1(10'd12), .td2(10'd12), .d1(d1[2]), .d2(d2[2]), .frame(frame[2]), .sample(sample[2]), .cnt_out(cnt[2]));

  realtime r1 [3][$], f1 [3][$], r2 [3][$];
  for (genvar i = 0; i < 3; i++) begin : g_mon
    always @(posedge d1[i]) r1[i].push_back($realtime);
    always @(negedge d1[i]) f1[i].push_back($realtime);
    always @(posedge d2[i]) r2[i].push_back($realtime);
  end

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  initial begin
    #200 rst_n = 1;
    #20us;
    for (int i = 0; i < 3; i++) begin
      real step;
      realtime tf, tr, tr2;
      int n;
      step = TCLK[i] / 32.0;
      n = r1[i].size();
      checks += 4;
      if (n < 5 || f1[i].size() < 5 || r2[i].size() < 5) begin
        failures++; $display("FAIL %0.1f ns clock: too few pulses", TCLK[i]);
        continue;
      end
      // pair the last D1 fall with the D1 rise before it and the D2 rise after it
      tf = f1[i][f1[i].size()-1];
      tr = 0; tr2 = 0;
      foreach (r1[i][k]) if (r1[i][k] < tf) tr = r1[i][k];
      foreach (r2[i][k]) if (r2[i][k] > tf && tr2 == 0) tr2 = r2[i][k];
      if (!near(r1[i][n-1] - r1[i][n-2], 32.0 * TCLK[i])) begin failures++; $display("FAIL period at Tclk %0.1f", TCLK[i]); end
      if (!near(tf - tr, 5.0 * TCLK[i] + 2.0 * step)) begin failures++; $display("FAIL D1 width at Tclk %0.1f", TCLK[i]); end
      if (!near(tr2 - tf, 12.0 * step)) begin failures++; $display("FAIL td1 at Tclk %0.1f", TCLK[i]); end
      if (!near(step * 1024.0, 32.0 * TCLK[i])) failures++;
      $display("fclk %0.1f MHz: step %0.4f ns, period %0.2f us, D1 width %0.3f ns, dead-time %0.3f ns",
               1000.0 / TCLK[i], step, (r1[i][n-1] - r1[i][n-2]) / 1000.0, tf - tr, tr2 - tf);
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
