# Dual stopwatch for a four-digit seven-segment board

Two stopwatches, A and B, keep time independently in minutes, seconds and
tenths (`M:SS.T`, 0:00.0 to 9:59.9) and share a single four-digit LED display,
a single set of Start / Stop / Reset buttons and an A/B slide switch. The switch
decides which stopwatch the buttons reach and which one is on the display;
the other stopwatch carries on untouched, running or stopped, in the
background. Four LEDs show which stopwatch is selected and blink while each
stopwatch is running.

The design targets a Spartan-3 class starter board with a 50 MHz oscillator,
four push buttons, eight slide switches, eight LEDs and a common-anode
four-digit display. The top-level port names are the board's pin names.

```
             SELECT_T ──┬───────────── select LEDs (COUNT_1 / COUNT_2)
                        │
 Start/Stop/Reset ──[AND with select]──┬─> stopwatch A ──┐ segments a..d ─[inputmux]─> a_f_o
                                       └─> stopwatch B ──┤ segments e..g ─[inputmux]─> e_f_o
                                                         ├ anodes (ORed) ─────────────> AN0..AN3
                                                         └ clk_10Hz & COUNTING ──────> STATE_1 / STATE_2
```

## Inside one stopwatch

Each `stopwatch` is built from five kinds of block:

| block | module | what it does |
|---|---|---|
| clock converter | `clk_convrt` | divides 50 MHz to 10 kHz, 10 Hz and 1 Hz |
| controller | `controller` | one flip-flop: running or stopped |
| tenths | `mod10counter` | 0..9, rightmost digit |
| seconds | `mod10counter` | 0..9 |
| tens of seconds | `mod6counter` | 0..5 |
| minutes | `mod10counter` | 0..9, leftmost digit |
| display driver | `fourdigitdisp` | scans the four digits at 10 kHz |

### One clock, two strobes

All flip-flops run on the board clock. The clock converter is a chain of three
counters (÷5000, ÷1000, ÷10). It gives a one-cycle strobe at 10 kHz, which
steps the display scan, and a one-cycle strobe at 10 Hz. The 10 Hz strobe is
the clock enable of the controller and all four digit counters. Everything
about counting therefore happens once per tenth of a second, on the same board
clock edge. The converter also gives 50 % square waves at 10 kHz, 10 Hz and
1 Hz. The 10 Hz wave drives the blinking LED.

A consequence worth knowing: **buttons are sampled only on the 10 Hz strobe**.
A press must be held across one strobe, which means up to 100 ms, to be seen.
Any human press is longer than that. There is no synchronizer or debouncer.
Sampling ten times a second already hides almost all contact bounce. An
asynchronous button edge can still land on a strobe cycle, so a synchronizer
would be the first thing to add for a product.

### The run/stop controller

The state is one bit, `Count`. Its next value, taken on every 10 Hz strobe, is

```
Count' = (Count & ~Stop & ~Reset) | (~Count & Start & ~Reset)
```

| Count | Reset | Start | Stop | Count' | meaning |
|---|---|---|---|---|---|
| x | 1 | x | x | 0 | reset stops the watch |
| 0 | 0 | 1 | x | 1 | start, even while Stop is held |
| 0 | 0 | 0 | x | 0 | stays stopped |
| 1 | 0 | x | 0 | 1 | keeps running |
| 1 | 0 | x | 1 | 0 | stop, even while Start is held |

So when Start and Stop are pressed together, the stopwatch changes state. A
stopped watch starts and a running watch stops. "Start overrides Stop" is true
only for a stopped watch.

### The digit chain

The four counters form a ripple of carries, all changing on the same strobe.
Each counter has an enable `CE` and a carry `CE_Out`:

```
tenths.CE  = Count        | Reset        CE_Out = (CE & S == last) | Reset
seconds.CE = tenths.CE_Out | Reset
tens.CE    = seconds.CE_Out | Reset
minutes.CE = tens.CE_Out   | Reset
```

`last` is 9 for the decade counters and 5 for the tens of seconds. A counter
advances on a strobe when its `CE` is high, and wraps to 0 after `last`.
`Reset` clears it on a strobe whatever `CE` is. The watch wraps from 9:59.9 to
0:00.0.

Reset is ORed into every enable and every carry. This comes from the original
gate-level build, where a counter only reset while enabled. It has no effect
here, because reset already has priority inside each counter. It is kept so
the structure matches the original.

### The display

The board's four digits share one set of segment lines. Each digit has its own
anode, and anodes and segments are active low. `fourdigitdisp` lights one
digit at a time. It steps AN0 → AN1 → AN2 → AN3 on the 10 kHz strobe, so each
digit is lit for 100 µs of every 400 µs. Digit AN0 is the rightmost and shows
the tenths. Digit AN3 is the leftmost and shows the minutes. The decimal point
is lit on AN1 and AN3. That gives the reading `M.SS.T`, with the points
standing in for the separators of `M:SS.T`.

## Sharing buttons and display between two stopwatches

This part holds the one idea of the design that is not obvious.

**Buttons.** Each button is ANDed with the select signal before it reaches a
stopwatch. A gets `button & ~SELECT_T` and B gets `button & SELECT_T`. A press
only ever reaches the selected stopwatch. Reset clears only the selected one
too.

**Segments.** Each stopwatch has its own display driver. Two 4-bit bus
multiplexers (`inputmux`) choose whose segment lines reach the board. One
carries segments a..d and the other carries e..g, because seven lines do not
fit one 4-bit mux.

**Anodes.** The anodes are not multiplexed. The board anode is the OR of A's
anode and B's anode. Because they are active low, a digit lights only when
*both* stopwatches drive that anode low. This works only because the two
stopwatches scan in lockstep. They share the board clock, and their clock
converters and scan counters start from the same all-zero state at
configuration, so they always point at the same digit. For this reason the
reset inputs of the divider and the scanner are tied off inside each stopwatch.
If you connect them, drive both stopwatches from the same reset, or the
display goes dark.

**LEDs.**

| port | board LED | shows |
|---|---|---|
| `COUNT_1` | LD7 | A is selected (`~SELECT_T`) |
| `COUNT_2` | LD6 | B is selected (`SELECT_T`) |
| `STATE_1` | LD1 | A's 10 Hz wave ANDed with A running: blinks while A counts |
| `STATE_2` | LD0 | the same for B |

`point_out` is taken from stopwatch B. Both stopwatches drive identical
points, so this does not matter.

## Ports and pins

| port | dir | width | pin | board part |
|---|---|---|---|---|
| `CLK` | in | 1 | T9 | 50 MHz oscillator |
| `Reset` | in | 1 | L14 | BTN3 |
| `Start` | in | 1 | M14 | BTN1 |
| `Stop` | in | 1 | M13 | BTN0 |
| `SELECT_T` | in | 1 | K13 | SW7 (0 = A, 1 = B) |
| `AN0..AN3` | out | 1 each | D14, G14, F14, E13 | digit anodes, active low |
| `a_f_o[3:0]` | out | 4 | E14, G13, N15, P15 | segments a, b, c, d, active low |
| `e_f_o[2:0]` | out | 3 | R16, F13, N16 | segments e, f, g, active low |
| `point_out` | out | 1 | P16 | decimal point, active low |
| `COUNT_1`, `COUNT_2` | out | 1 each | P11, P12 | LD7, LD6 |
| `STATE_1`, `STATE_2` | out | 1 each | P14, K12 | LD1, LD0 |

The one parameter is `CLK_HZ`, the board clock, with a default of 50_000_000.
It must be a multiple of 10 kHz with a factor of at least 2. The 10 kHz, 10 Hz
and 1 Hz rates are parameters of `clk_convrt`.

## Where this RTL departs from the original schematic

The design was first built as a gate-level schematic around vendor 4-bit
counters. This RTL keeps its blocks, names and wiring. It changes the points
below, most of them to make the watch keep correct time.

* **Carry gating.** In the original, each counter restarted itself as soon as
  it reached its last value, and its carry was high for as long as it stayed
  there, whether or not it was enabled. That is harmless when a counter is
  enabled every clock. In the chain it would let the seconds skip past 9 in a
  tenth, and make a stopped watch resting on x.9 move on by a second. Here a
  counter wraps only when enabled, and its carry is gated by its enable.
* **Tens of seconds.** The original decoded the value 6 to restart that
  counter, which with a synchronous restart gives seven states (0..6). Here it
  counts 0..5, so the seconds roll over at 60.
* **Clock enables instead of divided clocks.** The original clocked the
  controller and counters from the 10 Hz output of the divider. Here they use
  the board clock with a 10 Hz enable. The behaviour is the same: one step
  per tenth.
* **Unused pins dropped.** The original display driver and bus mux symbols
  have pins that were left open and are not described: four `s` inputs on the
  driver, and `S_*`, `P_*`, `DP` and `Sign` on the mux. They are not modelled.
  The mux's second select bit and its Y/Z inputs are kept and tied to 0.
* **Own choices where nothing is specified:**
  * the 50 MHz clock
  * active-low segment and anode outputs
  * hexadecimal glyphs for values 10..15
  * zeros from a disabled `inputmux`
  * power-up to zero through register initial values, which FPGA flows honour

Some warnings from Verilator are expected and left in place. One kind is
"procedural assignment to a declaration with an initial value": those are
the power-up values. The other kind is unused signals: the 1 Hz output, the
last carry and the unused mux bit.

## Files

`rtl/`:

| file | contents |
|---|---|
| `stopwatch_pkg.sv` | digit and segment types, the BCD-to-segment function |
| `controller.sv` | run/stop flip-flop |
| `mod10counter.sv` | decade counter |
| `mod6counter.sv` | 0..5 counter |
| `clk_convrt.sv` | clock divider and strobes |
| `fourdigitdisp.sv` | display scanner |
| `inputmux.sv` | 4-bit four-way mux |
| `stopwatch.sv` | one stopwatch |
| `dual_stopwatch.sv` | top level |

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`.
It also holds `tb_dual_stopwatch_full.sv`, which runs at the real 50 MHz, and
`tb_seg_pkg.sv`, the testbenches' own segment table. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dual_stopwatch \
  rtl/stopwatch_pkg.sv tb/tb_seg_pkg.sv rtl/clk_convrt.sv rtl/controller.sv \
  rtl/mod10counter.sv rtl/mod6counter.sv rtl/fourdigitdisp.sv rtl/inputmux.sv \
  rtl/stopwatch.sv rtl/dual_stopwatch.sv tb/tb_dual_stopwatch.sv -o sim
./obj_dir/sim
```

For another testbench, swap the top module and the last file, and keep only
the RTL files that testbench needs. The unit testbenches need the package and
their own module.

What the tests cover:

* **`tb_stopwatch` and `tb_dual_stopwatch`** set `CLK_HZ = 20_000`, so a
  tenth is 2000 cycles and a full 10-minute wrap takes seconds to simulate.
  * They step reference models of the stopwatches on every 10 Hz strobe.
  * After every tick they read the digits back off the multiplexed display.
  * They check the decimal points, the select LEDs and the exact number of
    cycles each blink LED was lit.
  * They count each mechanism and fail if one never happens: start, stop,
    both buttons on a stopped watch and on a running watch, reset, every
    digit carry, the 9:59.9 wrap, switching A/B, presses reaching only the
    selected watch, a watch running while not shown, and blinking.
* **`tb_dual_stopwatch_full`** uses the default 50 MHz clock. It times 1.2 s
  on A and 0.3 s on B and reads both back through the switch. It runs in
  under a minute.
* **Unit testbenches** compare each block with an independent reference.
  They use random stimulus, plus directed cases such as the carry count over
  ten wraps and the divider periods and duty cycles.
