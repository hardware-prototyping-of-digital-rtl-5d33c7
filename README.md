# Digital residential energy meter

A single-phase household electricity meter in synthesizable SystemVerilog. It
takes the instantaneous load current (in mA) and a scaled supply voltage,
works out power a hundred times a second, turns runs of constant power into
energy, counts kilowatt-hours as billing units and prices them, and drives
three sets of seven-segment displays: units used (8 digits), charge (8
digits) and a time-of-day clock (6 digits). A 30-day month counter closes
each billing month, keeps the previous month's figures, and lights a
reminder LED. A toggle input switches the unit and charge displays between
the present and the previous month.

The whole design runs from one 20 MHz clock. Slower rates (the 100 Hz sample
rate, the 1 Hz clock second, the display scan) are clock enables made by
counters, not derived clocks.

```
current_in ─► scale_down ─► power_calc ─► power_store ─► energy_calc ─► energy_storage ─┬─► billing ─┐
 (mA, 16b)     (/10, 11b)    (x voltage,   (run total,    (total x       (kWh units,      │  (x RATE)  │
                              16b)          run length)    length, 32b)   month, toggle)  │            │
                                 ▲ sample enable                              ▲ month_end │            │
clk ─► clk_div ──── tick (100 Hz) ──────────────────────► digital_clock ──────┘           ▼            ▼
                                                          (HH:MM:SS, days,    status_check+bin2bcd  status_check+bin2bcd
                                                           LED, 6 digits)            │                    │
                                                                                   display              display
                                                                               (7 seg + 8 enables)  (7 seg + 8 enables)
```

## How consumption is measured

This is the part of the design that is least like a textbook meter, so it is
worth reading before anything else.

1. **Sampling.** `clk_div` counts 200000 cycles of the 20 MHz clock and
   produces a one-cycle `tick`, i.e. 100 samples per second. It also flips a
   square-wave bit at each tick, which nothing inside uses.
2. **Current and power.** `scale_down` divides the current by 10 (0–15000 mA
   becomes 0–1500, an 11-bit value in units of 10 mA; larger inputs are
   clamped to 15 A). `power_calc` multiplies it by the 5-bit voltage code
   into a 16-bit power value. Both are registered, so the sample taken at a
   tick is the current applied at least two cycles earlier.
3. **Runs of equal power.** `power_store` does not integrate sample by
   sample. It compares each sample with the one before. While they are equal
   it adds the sample to a running total and counts it; when the value
   changes it hands the finished run — *total* (sum of its samples) and
   *count* (number of samples) — to the next stage and starts a new run with
   total = the new sample, count = 1. Example: 15 A at voltage code 5 is a
   power of 7500; three such samples followed by a different value give the
   run (22500, 3). The total and count are 16 bits. If either would overflow,
   the run is closed early and a new one begins with the same value
   (`overflow` strobe), so nothing ever wraps; at full load (7500) this
   happens every 8 samples.
4. **Energy.** `energy_calc` multiplies the run's total by its count. This
   is the rule the meter is built around, and it should be understood before
   trusting absolute readings: because the total is already a sum over the
   run, a constant power P held for n samples yields P·n², not P·n. Readings
   therefore depend on how long the load stays exactly constant (with the
   16-bit limit, at most 65535·n per run). Multiplying the run's single
   power value, rather than its total, by the count would give true energy;
   that would need `power_store` to pass the run's power value on as well.
5. **Units.** `energy_storage` adds each energy value to an accumulator.
   Whenever the accumulator reaches `UNIT_ENERGY` it counts one unit and
   subtracts `UNIT_ENERGY`, at most once per clock cycle, so a large energy
   value is worked off over a few cycles; the remainder carries over, also
   into the next month. The default
   `UNIT_ENERGY = 100 × 100 × 3600 × 1000 = 3.6·10¹⁰` is one kWh if current
   is in 10 mA steps (÷100 gives amperes), the voltage code is in volts and
   there are 100 samples per second. Energy must not arrive faster than it
   can be worked off; an assertion checks the accumulator never wraps. At
   the real sample rate one energy value arrives at most every 200000
   cycles, so this cannot happen.
6. **Billing.** `billing` multiplies the selected unit count by a flat
   `RATE` (default 1) and saturates at 2²⁴−1. The tariff is the obvious
   place to adapt the design: a tiered tariff would replace this one
   multiplier.

## Months and the toggle

`digital_clock` counts HH:MM:SS in six BCD counters (seconds and minutes
0–9, their tens 0–5, hours 0–9 or 0–3 after 20, ten-hours 0–2), advancing
once per `TICKS_PER_SEC` ticks. At each midnight a day counter advances; when
it reaches `DAYS_PER_MONTH` (30) it restarts, `month_end` pulses for one
cycle and the LED turns on for the first day of the new month.

On `month_end`, `energy_storage` copies the month's units (including a unit
counted in that very cycle) into a previous-month register and restarts the
current count at zero. `toggle` is a level: 1 shows the previous month's
units, and therefore its charge, on both displays; 0 shows the present
month. The selection is registered, so it takes effect one cycle later (plus
one conversion, below, before it reaches the display).

## Display path

Each of the two 8-digit displays has the same chain:

- **bin2bcd** converts the 24-bit value to 8 BCD digits with the shift-and-add-3
  method: the binary value is shifted one bit per clock into a 32-bit BCD
  register, and before each shift every digit of 5 or more gets 3 added. A
  capture strobe (`indicator`) loads the value; `ready` pulses exactly 24
  cycles later, and `bcd` then holds the result until the next one. A strobe
  while busy is ignored.
- **status_check** closes the loop: it pulses `status` (the converter's
  `indicator`) in the cycle after each rising edge of `ready`, and once
  during and right after reset. The converter therefore re-converts its input
  continuously, every 26 cycles, and the display follows the unit or charge
  value with at most about 50 cycles of delay.
- **display** scans the eight digits: a 14-bit free-running counter advances
  a 3-bit digit selector at each roll-over (16384 cycles ≈ 0.8 ms per digit,
  ≈ 150 Hz refresh at 20 MHz). The selected nibble goes through a
  `seven_seg_decoder` onto 7 shared segment lines, and one of 8 enable lines
  (active high, `digit_en[0]` = least significant digit) picks the display.

Segment coding differs between the displays, on purpose, to match their
drivers:

| displays        | polarity    | bit order (6 … 0) | 0  | 1  | 5  | 9  |
|-----------------|-------------|-------------------|----|----|----|----|
| units, charge   | active high | a b c d e f g     | 7E | 30 | 5B | 7B |
| clock (6 × 7)   | active low  | g f e d c b a     | 40 | 79 | 12 | 10 |

`seven_seg_decoder` takes both as parameters (`ACTIVE_LOW`, `A_MSB`).
Codes 10–15 show hex letters; BCD never produces them.

## Top-level interface (`energy_meter_top`)

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | 20 MHz system clock |
| `rst`        | in  | 1     | synchronous reset, active high; clock shows 00:00:00, all counts 0 |
| `power_on`   | in  | 1     | 1 = running; 0 stops the sample tick, so metering and the clock pause (displays keep their last values) |
| `toggle`     | in  | 1     | 1 = show previous month |
| `current_in` | in  | 16    | load current in mA (0–15000; higher is clamped) |
| `voltage_in` | in  | 5     | scaled supply voltage code (5 in all tests) |
| `unit_seg`, `unit_en` | out | 7, 8 | units display: segments and digit enables |
| `bill_seg`, `bill_en` | out | 7, 8 | charge display |
| `time_seg`   | out | 6 × 7 | clock digits, `[0]` = seconds … `[5]` = ten-hours, active low |
| `month_led`  | out | 1     | on for the first day after a month ends |

Inputs are assumed synchronous to `clk`; buttons need external debouncing and
synchronisers. The analog side (current and voltage sensing and their
conversion to the two input codes) is outside this design.

Parameters of the top, all defaulting to the real meter:
`CLK_DIVISOR` (200000), `TICKS_PER_SEC` (100), `DAYS_PER_MONTH` (30),
`UNIT_ENERGY` (3.6·10¹⁰), `RATE` (1), `SCAN_W` (14). Widths shared between
modules (16-bit power, run total and count; 32-bit energy; 24-bit units and
charge; 8 BCD digits) live in `meter_pkg`.

## What is original and what is chosen here

Taken from the original meter description: the module split and data flow;
20 MHz clock divided by 200000 with an 18-bit counter; ÷10 current scaling to
11 bits and the 15 A limit; 5 × 11 → 16-bit power; compare/accumulate/count
run detection with 16-bit registers; energy as run total × run length; one
unit per kWh; 24-bit binary to 8-digit BCD with the add-3 algorithm and its
capture/ready handshake and generics; the status loop with its reset pulse;
the 14-bit scan counter and 7 + 8 display lines; the clock's counter ranges,
30-day month and active-low digits; the segment codes above; toggle between
present and previous month.

Chosen here where the description is silent or unclear: closing a run early
instead of letting a 16-bit sum wrap; the value of `UNIT_ENERGY`; the flat
`RATE` and its default of 1; output saturation of the charge; clamping of
currents above 15 A; the seconds prescaler and how long the LED stays on;
edge detection in `status_check`; one-cycle `valid`/`ready` strobes;
active-high digit enables; the Power button as a tick enable; all reset
values and registered latencies. The divider description speaks of a
"100 Hz square wave" yet flips a bit every 200000 cycles; here the *sample
rate* is 100 Hz and the square wave it produces is therefore 50 Hz. The
hours counter is described as running "0 to 4"; it is built as an ordinary
24-hour clock.

Not built: the analog front end and the physical user terminal (LED, 22
displays, buttons); these appear only as top-level ports. A mode in which the
converter exposes its intermediate registers, mentioned for `bin2bcd`, is
not implemented.

## Size

Yosys coarse synthesis of the top reports about 560 flip-flop bits. That is
well beyond the small (576 logic element) FPGA the original was fitted to,
mainly because of the 32-bit energy path, the 40-bit accumulator and the two
independent 24-bit/32-bit converters; the original must have been narrower
in places it does not describe. The top also has 98 port bits.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          rtl/meter_pkg.sv tb/tb_bin2bcd.sv --top-module tb_bin2bcd
./obj_dir/Vtb_bin2bcd
```

| testbench | what it shows |
|-----------|---------------|
| `tb_energy_meter_top` | whole meter at fast rates (8-cycle tick, 1 tick per second, 1-day months, small units, rate 3) over two months of random loads against a reference model of the metering rule; reads the displays back from the scanned segment lines; counts run closes, early closes, units, month ends, toggle views, power-off, clamping, conversions and scans (≈1 s) |
| `tb_energy_meter_full` | the top with every default: 15 A × 3 samples and 4.291 A × 5 samples give runs (22500, 3) and (10725, 5) and 121125 energy; after 101 samples the clock reads 00:00:01 and both displays read 00000000 (≈20 M cycles, ≈10 s) |
| `tb_display_chain` | the display half alone with 150 units and a charge of 150: both displays scan 00000150 as 7E/5B/30 codes, converters restart every 26 cycles, clock codes at 23:39 and 23:59:59, month LED at midnight |
| `tb_power_store` | run totals and counts against a model, incl. early closes of sum and (4-bit) counter |
| `tb_bin2bcd` | conversions against decimal, 24-cycle latency, busy-ignore |
| `tb_digital_clock` | two 2-day months against a seconds counter; segment codes |
| `tb_display` | one-hot scanning order, codes, dwell of 8 and 16384 cycles |
| others | each module's arithmetic against values computed in the testbench |

A complete month at the default rates is 5·10¹³ clock cycles and cannot be
simulated; month handling is covered at reduced `TICKS_PER_SEC` and
`DAYS_PER_MONTH`, which change only counter limits.
