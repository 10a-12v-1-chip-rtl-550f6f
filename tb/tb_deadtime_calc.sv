`timescale 1ns/1ps
// tb_deadtime_calc: compares the three edge commands and the D2 enable with
// an integer reference: r1 = min(duty, 991), s2 = duty + td1,
// r2 = 1023 - td2, s2 raised to at least 32, D2 only when s2 < 1023 - td2
// and s2 <= 991.
module tb_deadtime_calc;
  import dcdc_pkg::*;
  dpwm_word_t duty;
  logic [9:0] td1, td2;
  edges_t edges;
  int checks = 0, failures = 0;

  deadtime_calc dut (.duty(duty), .td1(td1), .td2(td2), .edges(edges));

  task automatic try(input int d, input int a, input int b);
    int r1, s2, r2; bit en;
    duty = 10'(d); td1 = 10'(a); td2 = 10'(b);
    #1;
    r1 = (d > 991) ? 991 : d;
    s2 = (d + a < 32) ? 32 : d + a;
    r2 = 1023 - b;
    en = (s2 < 1023 - b) && (s2 <= 991) && (d <= 991);
    s2 = s2 % 1024;
    checks++;
    if (edges.r1 != 10'(r1) || edges.r2 != 10'(r2) || edges.d2_en != en || (en && edges.s2 != 10'(s2))) begin
      failures++;
      $display("FAIL duty=%0d td1=%0d td2=%0d got r1=%0d s2=%0d r2=%0d en=%b", d, a, b, edges.r1, edges.s2, edges.r2, edges.d2_en);
    end
  endtask

  initial begin
    try(111, 12, 12);       // 1.3 V from 12 V with 15 ns dead-times
    try(0, 0, 0);
    try(5, 3, 1);
    try(20, 12, 0);
    try(991, 0, 0);
    try(992, 0, 0);
    try(1000, 10, 10);
    try(900, 100, 10);
    try(500, 400, 123);
    for (int i = 0; i < 300; i++) try($urandom_range(0, 1023), $urandom_range(0, 63), $urandom_range(0, 63));
    for (int i = 0; i < 100; i++) try($urandom_range(0, 1023), $urandom_range(0, 1023), $urandom_range(0, 1023));
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
