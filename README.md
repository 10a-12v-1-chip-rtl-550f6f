# Digital controller for a 12 V → 1.3 V, 10 A single-chip buck converter

A synchronous buck converter regulating 1.3 V from 12 V at 780 kHz needs its
pulse width set to about 1 ns: a ±1 % output tolerance at a duty of roughly
11 % asks for a pulse-width resolution better than 1.38 ns, i.e. at least
10 bits per switching period. A plain counter-based PWM would need a clock
above 700 MHz for that, which a low-cost 0.6 µm process cannot provide.

This controller gets 1.25 ns steps from a **25 MHz** clock with a **hybrid
DPWM**: a 5-bit counter counts the 32 clock periods of a switching period,
and a 32-cell delay line, whose total delay is one clock period, splits each
clock period into 32 steps. A 3-bit **digital dither** on top moves the
*average* pulse width in 1/8-step increments (0.156 ns). The loop is closed
by a 6-comparator window A/D (7 error levels, 10 mV apart) and a **PID
compensator built from look-up tables**, so it needs no multiplier. The two
**dead-times** between the high-side and the low-side switch can be
programmed in the same 1.25 ns steps. PID tables and dead-times are loaded
over a serial port at start-up.

```
 vout ──► flash_adc ──► adc_error_encoder ──► pid_compensator ──► dither ──► hybrid_dpwm ──► d1 (high side)
          (6 comparators)   e ∈ -3..+3         d[n], 13 bit       10 bit     │             └► d2 (low side)
                                                   ▲ tables                  ├ dpwm_counter
 sclk/cs_n/mosi ──► serial_param_if ──► param_regs ┘ td1, td2, run ──────────┤ deadtime_calc
                                                                             ├ 3 × dpwm_edge_gen (comparator,
                                                                             │   delay_line, 32:1 tap mux)
                                                                             └ 2 × sr_latch
```

## Hybrid DPWM: how one pulse is built

Times are counted in *steps* of Tclk/32 = 1.25 ns; a switching period is
1024 steps (32 clocks, 1.28 µs, 781 kHz).

* `dpwm_counter` counts 0..31. While it is 0, `s1` is high and sets the
  high-side latch: **D1 turns on at the start of every period.**
* An **edge channel** (`dpwm_edge_gen`) takes a 10-bit edge command and
  splits it: the top 5 bits (msb) are compared with the counter; while they
  match, `del_in` is high for exactly one clock period. `del_in` runs down the
  32-cell `delay_line`; tap *k* is `del_in` delayed by (k+1) cells. A 32:1
  multiplexer picks tap *lsb*. The channel output therefore rises
  `msb × 40 ns + (lsb + 1) × 1.25 ns` into the period and stays high for
  40 ns.
* Three channels produce R1 (D1 off), S2 (D2 on) and R2 (D2 off). Two
  `sr_latch`es (reset dominant) hold D1 and D2.

`deadtime_calc` turns the pulse width `duty` and the dead-times into edge
commands. Because a channel fires one cell *after* the selected count, it
subtracts one step from each command:

| edge      | command          | fires at (steps)       |
|-----------|------------------|------------------------|
| D1 on     | counter = 0      | 0                      |
| D1 off    | r1 = duty        | duty + 1               |
| D2 on     | s2 = duty + td1  | duty + td1 + 1         |
| D2 off    | r2 = 1023 − td2  | 1024 − td2             |

So D1 is on for `duty + 1` steps, and both dead-times are exactly `td1` and
`td2` steps (`td1` after D1 turns off, `td2` before D1 turns on again).

Three limits come from the one-clock-long edge pulses. This design adds them;
the timing diagrams it follows do not mention them:

* `r1` is capped at 991, so a D1 reset pulse never runs into the next period.
  The compensator caps its command to match (`DUTY_MAX` = 991 × 8).
* The R2 pulse of one period lasts into the first clock of the next, and
  while it is high it blocks any set. So `s2` is raised to at least 32, which
  makes the first dead-time longer only for duties below 3 %.
* If `duty + td1` does not come before `1023 − td2`, or is above 991, D2 is
  left off for that period.

Commands are double-buffered. `duty`, `td1`, `td2` and `en` are sampled on
the clock edge that ends a period (`frame`), so a new value applies to a whole
period. The mux select cannot change under a live pulse.

### The delay line is a model

The real delay cells are analog. An analog bias loop adjusts their supply
current until the 32 cells span one clock period. `delay_line.sv` is a
**behavioural model** (`#` delays, not synthesizable). It assumes that loop
has settled, so each cell delays by the parameter `T_CELL` (1.25 ns by
default). To model another clock, set `T_CELL = Tclk/32`: 1.875 ns at
16.7 MHz or 0.781 ns at 40 MHz. The model has no cell mismatch. A built
chip's average step differs a little from Tclk/32 (about 1.22 ns has been
reported at 25 MHz). The bias loop itself is not given here. For synthesis,
`delay_line` has to be replaced with the real cell array. Everything else in
`rtl/` is synthesizable. Yosys maps `delay_line` to nothing because the
delays are ignored, and the logic around it stays intact.

## Dither

`dither` splits the 13-bit command into a 10-bit width *w* and a 3-bit
fraction *k*. In each group of 8 periods, *k* pulses get `w + 1` and the
rest get `w`. The LC filter averages the pulses. Which periods get the long
pulse is decided by a bit-reversed 3-bit period counter compared with *k*,
which spreads the long pulses evenly (k = 4 gives every other period).

## Error quantiser and LUT-PID

`flash_adc` (a behavioural model of six clocked comparators) compares the
output voltage, carried as a signed integer in microvolts, with
`Vref + (k − 2.5) × 10 mV`. `adc_error_encoder` counts the comparators that
are high (*m*) and outputs `e = 3 − m`. This is the error *reference minus
output*, in 10 mV units, clipped to ±3. Counting ones rather than locating
the top one means a single wrong comparator costs at most one LSB.

`pid_compensator` implements

```
d[n] = d[n−1] + A(e[n]) + B(e[n−1]) + C(e[n−2])
```

where A, B and C are 7-entry tables (`pid_lut`, 16-bit signed entries) that
hold the precomputed products `a·e`, `b·e`, `c·e`. The tables need not be
linear. The result is saturated to [0, DUTY_MAX]. While `run` is low, the
accumulator holds `d_init` and the error history is cleared.

**Loop timing.** The comparators latch every clock and the encoder registers
the error. The compensator takes the error at counter value 29 (the DPWM's
`sample` pulse). The new width is loaded at the end of count 31, so a
voltage sample reaches the switches about 5 clocks (0.2 µs) later. An
earlier version applied the result one whole period later, and with the
0.67 µH / 230 µF filter that extra delay made the loop oscillate.

**Tables used in the tests** (not given with the design; tuned on a model of
the filter): `a = 612, b = −1060, c = 450`, so `A(e) = 612·e` and so on, in
units of 1/8 DPWM step per 10 mV. With an ideal L/C plant and a current-source
load, the output stays within 1.295–1.300 V at 5 A. A 5 A → 10 A load step
dips by 38 mV and recovers to within ±15 mV in 5 µs. At 0 A the output
ripple is 15 mV peak-to-peak; a ±1 LSB limit cycle of the coarse A/D sets
this figure, not the DPWM. These numbers come from
an idealised plant without parasitics and are a sanity check, not a
prediction for silicon.

## Serial port and registers

The serial protocol is this design's own: a write-only SPI mode-0 slave.
A frame is 24 bits, MSB first: an 8-bit address followed by 16 data bits.
The register is written when `cs_n` rises after exactly 24 bits; frames of
any other length are ignored. The inputs are synchronised to `clk`, so
`sclk` must be slower than about clk/4.

| address   | register                                          | reset |
|-----------|---------------------------------------------------|-------|
| 0x00–0x06 | table A, entry for e = −3 … +3                    | 0     |
| 0x08–0x0E | table B                                           | 0     |
| 0x10–0x16 | table C                                           | 0     |
| 0x20      | td1 (steps of 1.25 ns, 10 bits)                   | 12 (15 ns) |
| 0x21      | td2                                               | 12 (15 ns) |
| 0x22      | d_init (13-bit start duty)                        | 0     |
| 0x23      | bit 0: run (closes the loop, enables d1/d2)       | 0     |

Start-up: load the tables, the dead-times and `d_init`, then set `run`.
While `run` is 0, both switch outputs are held low.

## Top level

`dcdc_controller_top` has these ports:

* `clk`, `rst_n`: the clock and a synchronous, active-low reset.
* `sclk`, `cs_n`, `mosi`: the serial port.
* `vout_uv`: the sensed output voltage.
* `d1`, `d2`: the gate-drive commands to the level shifter and drivers.
* `frame`: one clock per period.
* `cnt_out`, `duty_cmd`, `err`: outputs for observation only.

Parameters: `T_CELL` (1.25 ns), `VREF_UV` (1 300 000), `LSB_UV` (10 000).

Not part of this RTL: the gate drivers and level shifter, the Pch/Nch LDMOS
power switches, the bump/PCB interconnect, the bandgap, the delay-line bias
loop and the external EEPROM. These are analog, power or off-chip parts.

## Departures and open points

* The D2 delay channels are labelled inconsistently in the original figures:
  one drawing gives `1 − td1` and `duty + td2`, while the timing diagram gives
  `duty + td1` and `1 − td2`. This design follows the timing diagram: td1 is
  the dead-time after the high-side switch turns off.
* The design adds the following; none of it is specified in the original:
  the one-step offset in the edge commands, the edge limits, the D2 drop,
  command double-buffering, the latch priority, the sample point, the
  saturation limits, the error encoding, table widths and the serial
  protocol.
* `delay_line` and `flash_adc` are behavioural models of analog circuits.
  `sr_latch` is a real latch on purpose: it holds a signal set and reset by
  asynchronous edges.
* `hybrid_dpwm` asserts at every clock edge that `d1 && d2` never occurs.

## Simulating

All files use `timescale 1ns/1ps`. Testbenches are self-checking. Each ends
by printing `TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_dcdc_controller_top \
    rtl/dcdc_pkg.sv tb/tb_dcdc_controller_top.sv
./obj_dir/Vtb_dcdc_controller_top
```

`-y rtl -y tb` lets Verilator find each module in the file of the same
name. The package must be given explicitly, ahead of the testbench. The same
command runs any other testbench if you change the two names.

| testbench                 | what it checks |
|---------------------------|----------------|
| `tb_dcdc_controller_top`  | closed loop with `buck_plant_model` at default sizes: serial load, 5 A regulation, 5→10 A step, td1 changed to 9 steps while running, 0 A (inductor current reversing); every period's D1 width against the dithered command and both dead-times; counts of each mechanism (serial writes, PID updates, dithered pulses, D2 pulses, error levels) |
| `tb_hybrid_dpwm`          | D1/D2 edge times to 0.01 ns for the 00101_00001 example, 15 ns and 11.25 ns dead-times, random cases, D2 drop, disable, 1.28 µs period |
| `tb_dpwm_edge_gen`        | one channel's edge time and width for random msb/lsb, enable |
| `tb_dpwm_clock_sweep`     | the DPWM at 16.7, 25 and 40 MHz with T_CELL = Tclk/32: period, 00101_00001 pulse width and a 12-step dead-time all scale with the clock |
| `tb_delay_line`           | every tap at 25 MHz and 40 MHz cell delays |
| `tb_dpwm_counter`, `tb_sr_latch`, `tb_deadtime_calc`, `tb_dither`, `tb_pid_lut`, `tb_pid_compensator`, `tb_adc_error_encoder`, `tb_flash_adc`, `tb_serial_param_if`, `tb_param_regs` | unit behaviour against reference models |

The closed-loop test simulates about 1 ms and runs in about a second.
