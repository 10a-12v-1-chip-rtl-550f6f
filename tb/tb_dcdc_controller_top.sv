`timescale 1ns/1ps
// tb_dcdc_controller_top: closed-loop test of the whole controller at its
// default sizes, with the buck power stage modelled by buck_plant_model
// (12 V in, 1.3 V out, 0.67 uH / 230 uF, current-source load).
// Sequence:
//  1. reset, then load the PID tables (a = 612, b = -1060, c = 450 per LSB of
//     error, in 1/8-step duty units), td1 = td2 = 12 steps (15 ns), the start
//     duty 887 (1.3/12 of 8192) and run = 1 through the serial port;
//  2. regulate at 5 A for 400 us and check |Vout - 1.3 V| <= 15 mV at the end;
//  3. step the load from 5 A to 10 A and check the deviation (<= 60 mV) and
//     the recovery into +-15 mV within 20 us;
//  4. reprogram td1 to 9 steps (11.25 ns) while running and check it;
//  5. drop the load to 0 A and check regulation and the output ripple.
// Every period it measures D1's width and the two dead-times and checks them
// against the duty command (with dither) and td1/td2. It counts each
// mechanism (serial writes, table-driven PID updates, every error level of
// the A/D used in closed loop, dithered long pulses, dead-time changes, D2
// present) and fails if one never happened.
module tb_dcdc_controller_top;
  import dcdc_pkg::*;
  logic clk = 0, rst_n = 0, sclk = 0, cs_n = 1, mosi = 0;
  logic signed [31:0] vout_uv;
  logic d1, d2, frame;
  logic [4:0] cnt_out;
  duty_t duty_cmd;
  err_t err;
  real i_load = 5.0, v_out, i_l;
  logic plant_init = 1;
  int checks = 0, failures = 0;
  localparam real STEP = 1.25;

  // mechanism counters
  int n_neg_il = 0;
  int n_spi = 0, n_pid_updates = 0, n_long = 0, n_td_checks = 0, n_d2 = 0, n_td1_change = 0;
  int n_err [7];

  dcdc_controller_top dut (
    .clk(clk), .rst_n(rst_n), .sclk(sclk), .cs_n(cs_n), .mosi(mosi),
    .vout_uv(vout_uv), .d1(d1), .d2(d2), .frame(frame), .cnt_out(cnt_out), .duty_cmd(duty_cmd), .err(err)
  );

  buck_plant_model plant (
    .d1(d1), .d2(d2), .i_load_a(i_load), .v_init(1.3), .i_init(5.0), .init(plant_init),
    .vout_uv(vout_uv), .v_out(v_out), .i_l(i_l)
  );

  always #20 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t ns", what, $time); end
  endtask

  // ---- serial port driver: 8-bit address, 16-bit data, MSB first --------
  task automatic spi_write(input logic [7:0] a, input logic [15:0] d);
    logic [23:0] f;
    f = {a, d};
    cs_n = 0; #400;
    for (int i = 23; i >= 0; i--) begin
      mosi = f[i]; #200 sclk = 1; #200 sclk = 0;
    end
    #200 cs_n = 1; #400;
    n_spi++;
  endtask

  // ---- period-by-period measurement ---------------------------------------
  realtime t_start, t_d1_fall, t_d2_rise, t_d2_fall;
  int expected_td1 = 12, expected_td2 = 12, cur_td1 = 12;
  duty_t cmd_this, cmd_next;
  bit measuring = 0;

  always @(negedge d1) t_d1_fall = $realtime;
  always @(posedge d2) t_d2_rise = $realtime;
  always @(negedge d2) t_d2_fall = $realtime;

  always @(posedge clk) if (frame) begin
    realtime now;
    now = $realtime;
    if (measuring && t_start > 0) begin
      int w, base, s2;
      // D1 width of the period that just ended, in steps (minus the +1)
      w = int'((t_d1_fall - t_start) / STEP) - 1;
      base = int'(cmd_this[12:3]);
      chk(w == base || (w == base + 1 && cmd_this[2:0] != 0), "D1 width follows duty command");
      if (!(w == base || (w == base + 1 && cmd_this[2:0] != 0)) && failures < 8) $display("w=%0d base=%0d cmd=%0d fall=%0t start=%0t r2=%0t", w, base, cmd_this, t_d1_fall, t_start, t_d2_rise);
      if (w == base + 1) n_long++;
      if (t_d2_rise > t_start) begin
        s2 = (w + cur_td1 < 32) ? 32 : w + cur_td1;
        n_d2++;
        chk(int'((t_d2_rise - t_d1_fall) / STEP) == s2 - w, "dead-time td1");
        chk(int'((now - t_d2_fall) / STEP) == expected_td2, "dead-time td2");
        n_td_checks++;
      end
    end
    cmd_this = duty_cmd;      // the value the DPWM loads on this edge
    cur_td1  = expected_td1;
    t_start  = now;
    if (measuring) n_pid_updates++;
  end

  always @(posedge clk) if (measuring && frame) n_err[int'(err) + 3]++;

  // ---- main sequence -------------------------------------------------------
  initial begin
    real vmax, vmin, dev;
    realtime t_step, t_last_out;
    for (int i = 0; i < 7; i++) n_err[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int e = -3; e <= 3; e++) begin
      spi_write(ADDR_LUT_A + 8'(e + 3), 16'(612 * e));
      spi_write(ADDR_LUT_B + 8'(e + 3), 16'(-1060 * e));
      spi_write(ADDR_LUT_C + 8'(e + 3), 16'(450 * e));
    end
    spi_write(ADDR_TD1, 16'd12);
    spi_write(ADDR_TD2, 16'd12);
    spi_write(ADDR_DINIT, 16'd887);
    chk(!d1 && !d2, "switches off before run");
    fork
      spi_write(ADDR_CTRL, 16'd1);
      begin @(posedge d1); plant_init = 0; end   // plant starts with the switching
    join
    measuring = 1;
    #300us;
    // steady state at 5 A
    vmax = 0; vmin = 10;
    for (int i = 0; i < 1000; i++) begin
      #100;
      if (v_out > vmax) vmax = v_out;
      if (v_out < vmin) vmin = v_out;
    end
    $display("steady 5 A: Vout %0.4f .. %0.4f V", vmin, vmax);
    chk(vmax <= 1.315 && vmin >= 1.285, "regulation at 5 A within 15 mV");
    // load step 5 A -> 10 A
    i_load = 10.0;
    t_step = $realtime;
    t_last_out = t_step;
    dev = 0;
    for (int i = 0; i < 4000; i++) begin
      #20;
      if (1.3 - v_out > dev) dev = 1.3 - v_out;
      if (v_out > 1.315 || v_out < 1.285) t_last_out = $realtime;
    end
    $display("step 5->10 A: max deviation %0.1f mV, back within 15 mV after %0.2f us",
             dev * 1000.0, (t_last_out - t_step) / 1000.0);
    chk(dev > 0.005, "load step disturbs the output");
    chk(dev <= 0.060, "load-step deviation <= 60 mV");
    chk(t_last_out - t_step <= 20us, "recovery within 20 us");
    // change the first dead-time on the fly (11.25 ns)
    spi_write(ADDR_TD1, 16'd9);
    @(posedge clk iff frame);
    expected_td1 = 9;
    n_td1_change++;
    #50us;
    vmax = 0; vmin = 10;
    for (int i = 0; i < 200; i++) begin
      #100;
      if (v_out > vmax) vmax = v_out;
      if (v_out < vmin) vmin = v_out;
    end
    chk(vmax <= 1.315 && vmin >= 1.285, "regulation at 10 A within 15 mV");
    // no load: the inductor current reverses each period
    i_load = 0.0;
    #150us;
    vmax = 0; vmin = 10;
    for (int i = 0; i < 1000; i++) begin
      #100;
      if (v_out > vmax) vmax = v_out;
      if (v_out < vmin) vmin = v_out;
      if (i_l < 0.0) n_neg_il++;
    end
    $display("no load: Vout %0.4f .. %0.4f V, ripple %0.1f mV", vmin, vmax, (vmax - vmin) * 1000.0);
    chk(vmax <= 1.315 && vmin >= 1.285, "regulation at 0 A within 15 mV");
    chk(n_neg_il > 0, "inductor current reverses at no load");
    measuring = 0;
    // mechanisms
    $display("serial writes %0d, PID updates %0d, long (dithered) pulses %0d, D2 pulses %0d, dead-time checks %0d",
             n_spi, n_pid_updates, n_long, n_d2, n_td_checks);
    $display("error levels -3..+3 seen: %0d %0d %0d %0d %0d %0d %0d",
             n_err[0], n_err[1], n_err[2], n_err[3], n_err[4], n_err[5], n_err[6]);
    chk(n_spi == 26, "serial writes");
    chk(n_pid_updates > 100, "PID updates");
    chk(n_long > 0, "dither lengthened pulses");
    chk(n_d2 > 100 && n_td_checks > 100, "D2 pulses and dead-time checks");
    chk(n_td1_change == 1, "dead-time reprogrammed");
    chk(n_err[3] > 0 && n_err[2] > 0 && n_err[4] > 0, "error levels -1, 0, +1 used");
    chk(n_err[1] + n_err[0] + n_err[5] + n_err[6] > 0, "large error levels used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
