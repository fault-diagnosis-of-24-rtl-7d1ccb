# A 24-hour clock that tests its own counters

A digital clock that shows hours and minutes is a chain of four small counters:
minutes (0–9), tens of minutes (0–5), hours (0–9) and tens of hours (0–2). If one of
them miscounts, for example by wrapping after 7 instead of 9, the displayed time is
wrong. When the counters are chained, the fault can take hours of running to show
up. This design gives the clock a second mode of operation in which it tests itself:

* **Working mode** (`t_c_mod = 0`): the four counters are in series and keep time
  from 00:00 to 23:59, advanced by a one-minute pulse.
* **Test mode** (`t_c_mod = 1`): the counters are split apart and all advance in
  parallel on a test pulse. A control code picks one of them through a bus
  multiplexer. A test vector generator counts over the same range as that counter.
  A comparator flags every cycle in which the two differ.

The display is a single BCD seven-segment driver. It shows the multiplexed digit at
the position named by the same control code. Stepping the code scans the four
digits, and the decimal point marks a digit whose counter failed its test.

The architecture follows a published design of a testable FPGA clock: the counter
chain, the series/parallel reconfiguration, the bus multiplexer, test vector
generator, comparator and seven-segment display, and their connections. The single
system clock, the control-code encoding, the display encoding and the sticky fault
flag are choices made here. They are listed under *Departures* below.

## Block structure

```
                      fault_diag_clock_top
 min_clk ─┐  ┌──────────────── testable_clock ───────────────┐
 tm_clk  ─┼─►│ counter60: mod_counter(10) ones_min            │
 t_c_mod ─┘  │            mod_counter(6)  tens_min  ──ctrl──┐ │
             │ counter24: mod_counter(10) ones_hr   ◄─hrs_clk┘ │
             │            mod_counter(3)  tens_hr              │
             └───────────────┬───────────────────────────────┘
                   4 digits  ▼
 ctrl_sel ──────────────► bus_mux ──mux_out──┬──► comparator ──error/fault
     │                                        │        ▲
     ├──────────────► test_vector_gen ─test_vector─────┘
     └──────────────► bcd7seg ◄── mux_out, error, disp_clear ──► seg, an, dp
```

| file | what it is |
|---|---|
| `rtl/clock_pkg.sv` | digit type, control-code enum, the four moduli, `modulus_of()`, `bcd_to_seg()` |
| `rtl/mod_counter.sv` | one digit: modulo-N counter with enable, synchronous clear, terminal-count flag |
| `rtl/counter60.sv` | minutes: mod-10 + mod-6, carry `ctrl` at 59 → 00 |
| `rtl/counter24.sv` | hours: mod-10 + mod-3, 23 → 00 roll-over |
| `rtl/testable_clock.sv` | the two counters chained into a 24-hour clock |
| `rtl/test_vector_gen.sv` | reference counter whose range is set by the control code |
| `rtl/bus_mux.sv` | 4-to-1 digit multiplexer |
| `rtl/comparator.sv` | mismatch flag and sticky fault flag |
| `rtl/bcd7seg.sv` | seven-segment decoder, digit-position enables, clear, error dot |
| `rtl/fault_diag_clock_top.sv` | the whole design |

## Series and parallel: how each counter is enabled

Everything is clocked by the one system clock `clk`. `min_clk` and `tm_clk` are
one-cycle enable pulses that are sampled on `clk`. They are not clocks. The count
enables are therefore where the two modes differ:

| digit | working mode (`t_c_mod = 0`) | test mode (`t_c_mod = 1`) |
|---|---|---|
| `ones_min` (mod 10) | `min_clk` | `tm_clk` |
| `tens_min` (mod 6)  | `min_clk & ones_min==9` | `tm_clk` |
| `ones_hr` (mod 10)  | `hrs_clk` | `tm_clk` |
| `tens_hr` (mod 3)   | `hrs_clk & ones_hr==9` | `tm_clk` |

`hrs_clk` is the minutes counter's `ctrl` output: `min_clk & time==xx:59`, low in test
mode. In working mode a pulse of `hrs_clk` at hour 23 clears both hour digits, so
23:59 goes to 00:00. Test mode has no 24-hour roll-over. Each digit runs over its
own full range, so after `n` test pulses from reset the digits read `n%10`, `n%6`,
`n%10` and `n%3`. `min_clk` is ignored in test mode and `tm_clk` is ignored in
working mode.

## The test path: control code, reference and comparison

The 2-bit control code `ctrl_sel` addresses the same counter in all three consumers:

| `ctrl_sel` | counter | range | display position (`an`) |
|---|---|---|---|
| `00` | tens of hours   | 0..2 | `an[3]` |
| `01` | tens of minutes | 0..5 | `an[1]` |
| `10` | minutes         | 0..9 | `an[0]` |
| `11` | hours           | 0..9 | `an[2]` |

`test_vector_gen` advances on `tm_clk` pulses in test mode and wraps after
`modulus_of(ctrl_sel) - 1`. The comparator raises `error`, which is combinational,
whenever `t_c_mod` is set and `mux_out != test_vector`. `fault` latches on the
following `clk` edge and holds until `rst`.

The reference only agrees with the counter under test if both start together. A test
of one counter is therefore:

1. Set `t_c_mod = 1` and the wanted `ctrl_sel`, and hold `rst` high for at least one `clk` edge.
2. Release `rst` and give at least one full range of `tm_clk` pulses, or two to see the wrap.
3. Read `fault`. A 1 means that counter miscounted. `error` and `dp` show the cycles at which it did.
4. Repeat from step 1 for the next counter. Changing `ctrl_sel` in the middle of a run breaks the alignment.

Example: a minutes counter with bit 3 stuck at 0 wraps after 7. With `ctrl_sel = 10`,
`error` first rises after the 8th test pulse, where the reference shows 8 and the
counter shows 0. It rises again whenever `n%8 != n%10`. Testing any other counter
stays clean, which isolates the fault.

## Display

`bcd7seg` decodes `mux_out` to `seg[6:0] = {g,f,e,d,c,b,a}`, active high. It enables
the one digit position that `ctrl_sel` names on `an[3:0]`, with `an[3]` as the leftmost
digit (tens of hours). `dp` lights with `error`. Codes 10–15 show a dash (segment g).
`disp_clear = 1` blanks segments, digit enables and dot. In working mode an external
scanner steps `ctrl_sel` through the four codes fast enough for the eye. That scanner
is not part of this RTL.

## Timing and reset

* Single clock `clk`. All registers are positive-edge triggered.
* `rst` is synchronous and active high. It clears all digits, the reference count and `fault`.
* A digit changes on the `clk` edge that samples its enable pulse. `mux_out`,
  `test_vector`, `error`, `seg`, `an` and `dp` follow combinationally in the same
  cycle. `fault` follows one edge later.
* Logic per counter digit: one 4-bit register, an incrementer and a compare. After
  synthesis the whole design is 21 flip-flops.

## Departures from the original design

* **Clocks.** The original treats `MIN_CLK`, `HRS_CLK` and `TM_CLK` as clocks and
  switches the counters between them. Here they are enables on one clock, so there
  is no clock multiplexing and no ripple clocking. `clk` is an extra port.
* **Tens-of-hours counter.** The source calls it mod 2 in places and mod 3 in others.
  Its range is 0–2 throughout, so it is mod 3.
* **Control-code mapping.** The source's test vector generator descriptions disagree
  on which code selects which range. Here the codes are 00→0..2, 01→0..5, 10→0..9 and
  11→0..9, one code per clock counter. The multiplexer and display use the same
  mapping. The `maxcount` values in the source's waveforms are not reproduced.
* **Shared control code.** One code drives the multiplexer, the reference and the
  display position. The source shows the same control signal entering all three but
  gives no encoding.
* **Added here:** the sticky `fault` flag, the decimal point as error marker, active
  polarities of segments and clear, and the `clr` input of `mod_counter` used for the
  24-hour roll-over.
* **Not built:**
  * Automatic fault correction. The source says a detected fault "can be corrected"
    but describes no mechanism, so this RTL stops at detecting and locating it.
  * The stopwatch mode that the source mentions. Its behaviour is not described.
  * The test vector generator's value is not shown on the display.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Each has a watchdog. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/clock_pkg.sv \
    tb/tb_fault_diag_clock_top.sv --top-module tb_fault_diag_clock_top -Mdir obj
./obj/Vtb_fault_diag_clock_top
```

Replace the testbench name to run another one: `tb_testable_clock`, `tb_counter60`,
`tb_counter24`, `tb_mod_counter`, `tb_test_vector_gen`, `tb_bus_mux`, `tb_comparator`
or `tb_bcd7seg`. All run in well under a second.

`tb_fault_diag_clock_top` runs the design at its only size:

* More than a full day in working mode, with the display scanned, checked against a
  minute-of-day model.
* A healthy test-mode run of each of the four counters.
* A stuck-at-0 fault forced onto bit 3 of the minutes digit. It checks the exact
  cycles where `error` rises, that `fault` latches, and that the hours counter still
  tests clean.
* Display clear.

It counts each of these events and fails if one never happened. The unit testbenches
compare against integer models: `n % M` for counters, minute-of-day arithmetic for
the clock, and a segment table written out letter by letter for the decoder.

## Changing it

The moduli are package constants in `clock_pkg` (`MOD_*`, `DAY_HOURS`). To add a
seconds stage, put a `counter60` in front of the minutes and drive its `min_clk` with
a one-second pulse. A seconds stage would also need a wider control code in
`bus_mux`, `test_vector_gen` and `bcd7seg`.
