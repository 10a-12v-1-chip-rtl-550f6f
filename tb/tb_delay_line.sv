`timescale 1ns/1ps
// tb_delay_line: sends pulses into the 32-cell delay-line model and measures
// when every tap rises and falls: tap k must follow the input by (k+1) cell
// delays, so the whole line spans one clock period (32 x 1.25 ns = 40 ns).
// Also runs a second instance with the cell delay of a 40 MHz clock.
module tb_delay_line;
  logic din = 0, din2 = 0;
  logic [31:0] tap, tap2;
  realtime t_in, rise [32], fall [32], rise2 [32];
  int checks = 0, failures = 0;

  delay_line #(.N(32), .T_CELL(1.25ns)) dut (.del_in(din), .tap(tap));
  delay_line #(.N(32), .T_CELL(0.78125ns)) dut2 (.del_in(din2), .tap(tap2));

  for (genvar k = 0; k < 32; k++) begin : g_mon
    always @(posedge tap[k])  rise[k]  = $realtime;
    always @(negedge tap[k])  fall[k]  = $realtime;
    always @(posedge tap2[k]) rise2[k] = $realtime;
  end

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  initial begin
    #100;
    t_in = $realtime;
    din = 1; din2 = 1;
    #40 din = 0;
    #100;
    for (int k = 0; k < 32; k++) begin
      checks += 3;
      if (!near(rise[k] - t_in, 1.25 * (k + 1))) begin failures++; $display("FAIL rise tap %0d: %f", k, rise[k] - t_in); end
      if (!near(fall[k] - t_in, 40.0 + 1.25 * (k + 1))) begin failures++; $display("FAIL fall tap %0d", k); end
      if (!near(rise2[k] - t_in, 0.78125 * (k + 1))) begin failures++; $display("FAIL 40MHz rise tap %0d", k); end
    end
    // total line delay equals one clock period
    checks++;
    if (!near(rise[31] - t_in, 40.0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
