`timescale 1ns/1ps
// tb_hybrid_dpwm: drives the hybrid DPWM with a 25 MHz clock and measures
// D1 and D2 over whole switching periods. For duty d and dead-times td1, td2
// (in 1.25 ns steps) it expects, from the period start:
//   D1 rises at 0 and falls at (d+1) steps,
//   D2 rises at (max(d+td1, 32)+1) steps and falls at (1024-td2) steps,
// i.e. dead-times of exactly td1 and td2 steps, a 32-clock (1.28 us) period,
// D2 absent when the dead-times leave no room, and both outputs off with en
// low. The no-overlap assertion inside the DPWM also runs throughout.
module tb_hybrid_dpwm;
  import dcdc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  dpwm_word_t duty = 0;
  logic [9:0] td1 = 0, td2 = 0;
  logic d1, d2, frame, sample;
  logic [4:0] cnt_out;
  realtime start, r1t, f1t, r2t, f2t;
  int n_r1, n_f1, n_r2, n_f2;
  int checks = 0, failures = 0;
  localparam real STEP = 1.25;

  hybrid_dpwm dut (.clk(clk), .rst_n(rst_n), .en(en), .duty(duty), .td1(td1), .td2(td2),
                   .d1(d1), .d2(d2), .frame(frame), .sample(sample), .cnt_out(cnt_out));

  always #20 clk = ~clk;
  always @(posedge d1) begin r1t = $realtime; n_r1++; end
  always @(negedge d1) begin f1t = $realtime; n_f1++; end
  always @(posedge d2) begin r2t = $realtime; n_r2++; end
  always @(negedge d2) begin f2t = $realtime; n_f2++; end

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: duty=%0d td1=%0d td2=%0d d1 %f..%f d2 %f..%f n=%0d%0d%0d%0d", what, duty, td1, td2,
               r1t - start, f1t - start, r2t - start, f2t - start, n_r1, n_f1, n_r2, n_f2);
    end
  endtask

  task automatic run_case(input int d, input int a, input int b, input bit ena);
    bit has_d2; int s2; realtime t_load;
    @(negedge clk);
    duty = 10'(d); td1 = 10'(a); td2 = 10'(b); en = ena;
    @(posedge clk iff frame);      // commands loaded, new period starts
    t_load = $realtime;
    @(posedge clk iff frame);      // measure the next full period
    start = $realtime;
    chk(near(start - t_load, 1280.0), "switching period 32 clocks");
    n_r1 = 0; n_f1 = 0; n_r2 = 0; n_f2 = 0;
    #1279.5;
    s2 = (d + a < 32) ? 32 : d + a;
    has_d2 = (s2 < 1023 - b) && (s2 <= 991);
    if (!ena) begin
      chk(n_r1 == 0 && n_r2 == 0 && !d1 && !d2, "outputs off when disabled");
    end else begin
      chk(n_r1 == 1 && near(r1t, start), "D1 rises at period start");
      chk(n_f1 == 1 && near(f1t - start, (d + 1) * STEP), "D1 falls at duty+1 steps");
      if (has_d2) begin
        chk(n_r2 == 1 && near(r2t - start, (s2 + 1) * STEP), "D2 rises td1 after D1 falls");
        chk(n_f2 == 1 && near(f2t - start, (1024 - b) * STEP), "D2 falls td2 before period end");
        chk(near((r2t - f1t), (s2 - d) * STEP), "dead-time td1");
      end else begin
        chk(n_r2 == 0, "D2 dropped when no room");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_case(161, 12, 12, 1);   // 00101_00001
    run_case(111, 12, 12, 1);   // 1.3 V / 12 V with 15 ns dead-times
    run_case(111, 9, 12, 1);    // td1 = 11.25 ns
    run_case(0, 1, 1, 1);
    run_case(31, 1, 1, 1);
    run_case(32, 0, 1, 1);
    run_case(991, 1, 1, 1);     // no room for D2
    run_case(900, 60, 70, 1);   // no room for D2
    run_case(500, 5, 5, 0);     // disabled
    for (int i = 0; i < 40; i++)
      run_case($urandom_range(0, 900), $urandom_range(0, 40), $urandom_range(1, 40), 1);
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
