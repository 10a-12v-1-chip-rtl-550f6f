`timescale 1ns/1ps
// tb_param_regs: checks the reset values (td1 = td2 = 12 steps, run off),
// register writes for td1, td2, d_init and run, that writes to unused
// addresses change nothing, and the table-write decode: table, entry and
// data for every valid address and no write strobe for invalid ones.
module tb_param_regs;
  import dcdc_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [7:0] wr_addr = 0;
  logic [15:0] wr_data = 0;
  logic [9:0] td1, td2;
  duty_t d_init;
  logic run, lut_we;
  lut_sel_t lut_sel;
  logic [2:0] lut_idx;
  lut_word_t lut_wdata;
  int checks = 0, failures = 0;

  param_regs dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
                  .td1(td1), .td2(td2), .d_init(d_init), .run(run), .lut_we(lut_we),
                  .lut_sel(lut_sel), .lut_idx(lut_idx), .lut_wdata(lut_wdata));

  always #20 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk);
    wr_addr = a; wr_data = d; wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    chk(td1 == 10'd12 && td2 == 10'd12 && !run && d_init == 0, "reset values");
    wr(8'h20, 16'd9);   chk(td1 == 10'd9, "td1");
    wr(8'h21, 16'd20);  chk(td2 == 10'd20, "td2");
    wr(8'h22, 16'd888); chk(d_init == 13'd888, "d_init");
    wr(8'h23, 16'd1);   chk(run, "run on");
    wr(8'h30, 16'hFFFF); chk(td1 == 10'd9 && td2 == 10'd20 && run && d_init == 13'd888, "unused address");
    wr(8'h23, 16'd0);   chk(!run, "run off");
    // table write decode (combinational, checked while wr_en is high)
    for (int a = 0; a < 256; a++) begin
      bit valid; int t;
      @(negedge clk);
      wr_addr = 8'(a); wr_data = 16'(a * 77); wr_en = 1;
      #1;
      t = a / 8;
      valid = (a < 8'h18) && (a % 8 < 7);
      chk(lut_we == valid, "lut_we decode");
      if (valid) chk(int'(lut_sel) == t && int'(lut_idx) == a % 8 && lut_wdata == 16'(a * 77), "lut fields");
      wr_en = 0;
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
