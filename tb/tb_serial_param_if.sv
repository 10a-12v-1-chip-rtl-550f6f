`timescale 1ns/1ps
// tb_serial_param_if: sends 24-bit SPI frames (8-bit address, 16-bit data,
// MSB first, 1 MHz sclk) and checks that each complete frame gives exactly one
// wr_en pulse with the right address and data, within 3 to 4 clocks of cs_n
// rising, and that frames of 23 or 25 bits give none.
module tb_serial_param_if;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0;
  logic wr_en;
  logic [7:0] wr_addr;
  logic [15:0] wr_data;
  int checks = 0, failures = 0, n_wr = 0;
  logic [7:0] got_a; logic [15:0] got_d;
  realtime t_cs, t_wr;

  serial_param_if dut (.clk(clk), .rst_n(rst_n), .sclk(sclk), .cs_n(cs_n), .mosi(mosi),
                       .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always #20 clk = ~clk;
  always @(posedge clk) if (wr_en) begin n_wr++; got_a = wr_addr; got_d = wr_data; t_wr = $realtime; end

  task automatic send(input logic [31:0] bits, input int nbits);
    cs_n = 0;
    #500;
    for (int i = nbits - 1; i >= 0; i--) begin
      mosi = bits[i];
      #500 sclk = 1;
      #500 sclk = 0;
    end
    #500 cs_n = 1;
    t_cs = $realtime;
    #1000;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [7:0] a; logic [15:0] d;
      a = 8'($urandom); d = 16'($urandom);
      n_wr = 0;
      send({8'h00, a, d}, 24);
      checks += 2;
      if (n_wr != 1 || got_a != a || got_d != d) begin
        failures++; $display("FAIL frame %h %h: n=%0d got %h %h", a, d, n_wr, got_a, got_d);
      end
      if (t_wr - t_cs < 2 * 40.0 || t_wr - t_cs > 4 * 40.0 + 1) begin
        failures++; $display("FAIL latency %f", t_wr - t_cs);
      end
    end
    n_wr = 0;
    send(32'h00ABCDE, 23);
    send(32'h1ABCDEF, 25);
    checks++;
    if (n_wr != 0) begin failures++; $display("FAIL short/long frame accepted"); end
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
