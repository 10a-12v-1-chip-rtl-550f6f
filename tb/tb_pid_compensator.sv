`timescale 1ns/1ps
// tb_pid_compensator: loads random product tables, then feeds random errors
// once per "period" and compares the duty command with an integer model of
// d[n] = sat(d[n-1] + A[e[n]] + B[e[n-1]] + C[e[n-2]]), saturated to
// [0, 7928]. Checks the one-clock latency, that nothing changes between
// sample pulses, and that run = 0 reloads d_init and clears the history.
module tb_pid_compensator;
  import dcdc_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, sample = 0, lut_we = 0;
  duty_t d_init = 0, duty;
  err_t e_in = 0;
  lut_sel_t lut_sel = LUT_A;
  logic [2:0] lut_idx = 0;
  lut_word_t lut_wdata = 0;
  int tab [3][7];
  int d_ref, e1_ref, e2_ref;
  int checks = 0, failures = 0;
  localparam int DMAX = 7928;

  pid_compensator dut (.clk(clk), .rst_n(rst_n), .run(run), .d_init(d_init), .sample(sample),
                       .e_in(e_in), .lut_we(lut_we), .lut_sel(lut_sel), .lut_idx(lut_idx),
                       .lut_wdata(lut_wdata), .duty(duty));

  always #20 clk = ~clk;

  task automatic load_tables(input int scale);
    for (int t = 0; t < 3; t++)
      for (int i = 0; i < 7; i++) begin
        tab[t][i] = $signed($urandom_range(0, 2 * scale)) - scale;
        @(negedge clk);
        lut_we = 1; lut_sel = lut_sel_t'(t); lut_idx = 3'(i); lut_wdata = 16'(tab[t][i]);
        @(negedge clk);
        lut_we = 0;
      end
  endtask

  task automatic step(input int e);
    int s;
    @(negedge clk);
    e_in = err_t'(e);
    sample = 1;
    @(negedge clk);
    sample = 0;
    s = d_ref + tab[0][e+3] + tab[1][e1_ref+3] + tab[2][e2_ref+3];
    d_ref = (s < 0) ? 0 : (s > DMAX) ? DMAX : s;
    e2_ref = e1_ref; e1_ref = e;
    checks++;
    if (int'(duty) != d_ref) begin failures++; $display("FAIL duty=%0d ref=%0d", duty, d_ref); end
    // nothing moves without a sample pulse
    e_in = err_t'($urandom_range(0, 6) - 3);
    repeat (3) @(negedge clk);
    checks++;
    if (int'(duty) != d_ref) begin failures++; $display("FAIL duty moved without sample"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    load_tables(200);
    d_init = 13'd888;
    @(negedge clk); @(negedge clk);
    checks++;
    if (duty != 13'd888) begin failures++; $display("FAIL d_init not loaded"); end
    run = 1;
    d_ref = 888; e1_ref = 0; e2_ref = 0;
    for (int n = 0; n < 200; n++) step($urandom_range(0, 6) - 3);
    // drive into both limits
    for (int n = 0; n < 60; n++) step((tab[0][6] + tab[1][6] + tab[2][6] > 0) ? 3 : -3);
    for (int n = 0; n < 60; n++) step((tab[0][0] + tab[1][0] + tab[2][0] > 0) ? -3 : 3);
    // stop and restart
    @(negedge clk); run = 0; d_init = 13'd4000;
    @(negedge clk); @(negedge clk);
    checks++;
    if (duty != 13'd4000) begin failures++; $display("FAIL reload"); end
    run = 1; d_ref = 4000; e1_ref = 0; e2_ref = 0;
    for (int n = 0; n < 50; n++) step($urandom_range(0, 6) - 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
