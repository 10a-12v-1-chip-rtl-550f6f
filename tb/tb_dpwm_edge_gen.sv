`timescale 1ns/1ps
// tb_dpwm_edge_gen: runs one DPWM edge channel from a reference 5-bit counter
// (25 MHz clock) and measures its output: for a command msb_lsb the edge must
// rise msb*40 ns + (lsb+1)*1.25 ns after the period start and stay high for
// one clock period (40 ns). With en low no edge may appear.
module tb_dpwm_edge_gen;
  logic clk = 0;
  logic [4:0] cnt = 0, msb = 0, lsb = 0;
  logic en = 0, edge_out;
  realtime t_rise, t_fall;
  int checks = 0, failures = 0, n_rise;

  dpwm_edge_gen dut (.cnt_out(cnt), .msb(msb), .lsb(lsb), .en(en), .edge_out(edge_out));

  always #20 clk = ~clk;
  always @(posedge clk) cnt <= cnt + 1'b1;
  always @(posedge edge_out) begin t_rise = $realtime; n_rise++; end
  always @(negedge edge_out) t_fall = $realtime;

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  task automatic run_case(input int m, input int l, input bit ena);
    realtime start;
    // change the command only during count 31, away from any edge
    @(posedge clk iff cnt == 5'd30);
    #1 msb = 5'(m); lsb = 5'(l); en = ena;
    @(posedge clk iff cnt == 5'd31);
    start = $realtime;
    n_rise = 0;
    #1279.5;
    checks++;
    if (!ena) begin
      if (n_rise != 0) begin failures++; $display("FAIL edge while disabled"); end
    end else if (n_rise != 1 || !near(t_rise - start, m * 40.0 + (l + 1) * 1.25)
                 || !near(t_fall - t_rise, 40.0)) begin
      failures++;
      $display("FAIL msb=%0d lsb=%0d rise=%f width=%f n=%0d", m, l, t_rise - start, t_fall - t_rise, n_rise);
    end
  endtask

  initial begin
    repeat (40) @(posedge clk);
    run_case(5, 1, 1);      // the 00101_00001 example
    run_case(0, 0, 1);
    run_case(0, 31, 1);
    run_case(29, 31, 1);
    run_case(12, 7, 0);
    for (int i = 0; i < 30; i++) run_case($urandom_range(0, 29), $urandom_range(0, 31), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
