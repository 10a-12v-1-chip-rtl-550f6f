`timescale 1ns/1ps
// tb_pid_lut: fills the three 7-entry product tables with random values,
// keeps a reference copy, and reads every entry back through each of the
// three read ports. Also checks that an index of 7 writes nothing and that
// reset clears the tables.
module tb_pid_lut;
  import dcdc_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  lut_sel_t sel = LUT_A;
  logic [2:0] idx = 0;
  lut_word_t wdata = 0, pa, pb, pc;
  err_t e0 = 0, e1 = 0, e2 = 0;
  lut_word_t ref_t [3][7];
  int checks = 0, failures = 0;

  pid_lut dut (.clk(clk), .rst_n(rst_n), .we(we), .sel(sel), .idx(idx), .wdata(wdata),
               .e0(e0), .e1(e1), .e2(e2), .pa(pa), .pb(pb), .pc(pc));

  always #20 clk = ~clk;

  task automatic wr(input int t, input int i, input lut_word_t v);
    @(negedge clk);
    we = 1; sel = lut_sel_t'(t); idx = 3'(i); wdata = v;
    @(negedge clk);
    we = 0;
  endtask

  task automatic read_all();
    for (int a = -3; a <= 3; a++) begin
      e0 = err_t'(a); e1 = err_t'(-a); e2 = err_t'(a);
      #1;
      checks += 3;
      if (pa != ref_t[0][a+3]) begin failures++; $display("FAIL A e=%0d", a); end
      if (pb != ref_t[1][-a+3]) begin failures++; $display("FAIL B e=%0d", -a); end
      if (pc != ref_t[2][a+3]) begin failures++; $display("FAIL C e=%0d", a); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3; t++) for (int i = 0; i < 7; i++) ref_t[t][i] = '0;
    read_all();
    for (int t = 0; t < 3; t++)
      for (int i = 0; i < 7; i++) begin
        ref_t[t][i] = lut_word_t'($urandom);
        wr(t, i, ref_t[t][i]);
      end
    wr(0, 7, 16'h1234);     // out of range: ignored
    read_all();
    // overwrite a few entries
    for (int n = 0; n < 10; n++) begin
      int t, i;
      t = $urandom_range(0, 2); i = $urandom_range(0, 6);
      ref_t[t][i] = lut_word_t'($urandom);
      wr(t, i, ref_t[t][i]);
    end
    read_all();
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) for (int i = 0; i < 7; i++) ref_t[t][i] = '0;
    read_all();
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
