`timescale 1ns/1ps
// serial_param_if: serial port through which the controller's parameters
// (PID table entries, dead-times, start-up settings) are loaded at start-up
// from an external EEPROM or a PC. The source design only names this
// interface; the protocol here is this design's own, a write-only SPI mode 0
// slave: while cs_n is low, one bit is taken from mosi on every rising sclk
// edge, MSB first. A frame is 24 bits, an 8-bit register address followed by
// 16 data bits. When cs_n returns high after exactly 24 bits, wr_en pulses for
// one clk cycle with wr_addr and wr_data; frames of any other length are
// dropped. sclk, cs_n and mosi are asynchronous to clk and pass through
// two-flop synchronisers, so sclk must stay below about clk/4 (6 MHz at
// 25 MHz). wr_en follows the cs_n rising edge by 3 to 4 clk cycles.
module serial_param_if #(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sclk,
  input  logic              cs_n,
  input  logic              mosi,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data
);
  localparam int FRAME = ADDR_W + DATA_W;

  logic [2:0] sclk_s, cs_s;
  logic [1:0] mosi_s;
  logic [FRAME-1:0] shreg;
  logic [$clog2(FRAME+1)-1:0] nbits;
  logic sclk_rise, cs_rise, cs_active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign cs_rise   = cs_s[1] && !cs_s[2];
  assign cs_active = !cs_s[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg   <= '0;
      nbits   <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (cs_rise) begin
        if (nbits == ($clog2(FRAME+1))'(FRAME)) begin
          wr_en   <= 1'b1;
          wr_addr <= shreg[FRAME-1 -: ADDR_W];
          wr_data <= shreg[DATA_W-1:0];
        end
        nbits <= '0;
      end else if (cs_active && sclk_rise) begin
        shreg <= {shreg[FRAME-2:0], mosi_s[1]};
        if (nbits != '1) nbits <= nbits + 1'b1;
      end
    end
  end
endmodule
