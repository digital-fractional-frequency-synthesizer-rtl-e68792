# Counter-based fractional frequency synthesizer

This synthesizer turns an input frequency `fx` into `fy = fx * k` using only
counters, a register and an adder. There is no oscillator loop to settle. It
measures one period of `fx` in cycles of a fast counting clock, scales that
number, and replays the scaled number as the output period. The ratio `k` can
be a fraction. The integer part of the scaled period is counted directly. The
fractional part is spread over many output periods by an accumulator, in the
same way as a fractional-N PLL spreads its divide ratio.

```
            fc1 (generator 1)                          fc2 (generator 2)
                 |                                          |
 fx --> LOAD/CLEAR --> Counter 1 (up) --C1--> Register --M--> Adder --> Counter 2 (down) --> fy
        sequencer      counts fc1 during      g(C1) =    \--R--> Accumulator --overflow--^      \--> /2 --> fy_half
                       one fx period          C1*mul/2^shr +/- fine
                 ^                                |
                 +------ adaptive control <-------+   (scales fc1 and fc2 together)
```

## The basic relation

Counter 1 counts `fc1` for one period of `fx`, so it holds `C1 = fc1/fx`.
The register replaces that number by `C2 = g(C1)`. Counter 2 counts `fc2`
down from `C2` and gives one output pulse each time it passes zero, so
`fy = fc2/C2`. Together:

```
fy = fc2 / g(fc1 / fx)
```

With `g(C1) = C1 / k1` this becomes `fy = k1 * fx * fc2 / fc1`. So the output
follows the input at once, and the ratio is set by `k1` and by the ratio of
the two counting clocks. When `fc1 = fc2`, `k1 = 1` gives `fy = fx`.

Accuracy depends on the size of the counts. A count of 100 leaves a
quantisation step of 1 %. The counting clock must therefore be much faster
than `fx`. The counters must also be long enough not to overrun at the lowest
`fx`. That means `ceil(log2(fc1_max / fx_min))` bits for Counter 1.

## One measurement, cycle by cycle

All logic runs on one master clock `clk`, which is the crystal oscillator.
The generators are clock enables of that clock (`fsynth_gen`). Counter 1
advances on a cycle where generator 1's enable is high. Counter 2 advances on
a cycle where generator 2's enable is high.

A rising edge of `fx` ends one measurement and starts the next:

1. `fx` passes a two-flop synchronizer and an edge detector. This takes
   3 cycles.
2. **LOAD** (`LOAD_CYC` cycles, default 1): the register captures Counter 1.
   Counter 1 is stopped while LOAD is high.
3. **CLEAR** (`CLEAR_CYC` cycles, default 1): Counter 1 is reset to zero.
4. Counter 1 then counts until the next edge.

One cycle later the register applies `g` and presents `M` and `R`. Counter 2
does not restart when a new number arrives. It finishes the period it is
counting and loads the new value at its next carry-out. Output periods are
therefore never cut short, and a change of `fx` shows at the output within
one input period plus one output period.

The cycles spent in LOAD and CLEAR are not counted. So `C1` is short by
`LOAD_CYC + CLEAR_CYC` counts, and the output period is short by the same
amount. With the defaults and `fc1 = clk` this is 2 counts. The error is a
constant number of counts, not a constant ratio. It is removed by setting
the fine-tuning word to `+2`. The board-level measurements that this design
reproduces used a 0.6 us dead time at 31.111 MHz, which is about 19 counts.
`tb_fsynth_board` shows the same constant difference of 19 counts for every
`fx` from 1.5 kHz to 100 kHz.

The first capture after reset holds a count that did not start at an edge.
The output is held off (`valid` low) until the second capture.

## The control function g

The register holds `C1`. Every cycle it computes

```
M.R = C1 * mul / 2**shr          (R = FRAC_W bits below the binary point)
M   = M + fine   or   M - fine   (fine_sub selects)
```

The control word is the `g_ctrl_t` struct in `fsynth_pkg`.

| setting                        | effect on C2         | effect on fy         |
|--------------------------------|----------------------|----------------------|
| `mul=1, shr=0`                 | C2 = C1              | fy = fx * fc2/fc1    |
| `mul=1, shr=s` (right shift)   | C2 = C1 / 2^s        | x 2^s                |
| `mul=2^s, shr=0` (left shift)  | C2 = C1 * 2^s        | / 2^s                |
| `mul=round(2^16/k), shr=16`    | C2 = C1 / k          | x k, fractional k    |
| `fine`, `fine_sub`             | C2 +/- fine          | trims the period     |

Counter 1 is 24 bits and Counter 2 is 32 bits. The 8 extra bits allow a
division of the output frequency by up to 2^8 without overflow. The fine-tuning
magnitude is 23 bits.

`M` is clamped to the range 1 .. 2^C2_W - 2, so that every output period is at
least one count and the correction carry cannot overflow Counter 2. `sat`
reports a clamp or a Counter 1 overrun.

A ratio such as x11 needs `mul = 5958` and `shr = 16`. That ratio is
5958/65536, which is 3e-5 away from 1/11. For an exact ratio of the form
`k = 2^s`, use the shift settings.

## Fractional error correction

Counter 2 can count only whole cycles. If it always used `M`, each output
period would be short by `R / 2^FRAC_W` of a count. The output frequency
would then always be a little too high. For example, with C1 = 1000 and x11,
C2 = 90.91 but every period would be 90.

`fsynth_fracacc` adds `R` into a `FRAC_W`-bit accumulator once per output
period. This happens in the cycle in which Counter 2 reloads. When the sum
overflows, that one period is loaded as `M + 1` instead of `M`. Over any run
of `n` periods, the total length stays within one count of `n * (M + R/2^FRAC_W)`.
This is the property the testbenches check. The accumulator contents form a
sawtooth. The adder also subtracts one, because Counter 2 counts through zero
and a preset `P` gives a period of `P + 1`.

With `corr_en` low the accumulator is held at zero, and every period is `M`.
This is the uncorrected synthesizer, kept for comparison.

## Counter 2

Counter 2 is a chain of 8-bit presettable down-counter slices
(`fsynth_dslice`). The carry-in of the lowest slice is tied high. Each slice
counts down when its carry-in is high, and passes a carry when it is zero.
The carry-out of the last slice means that the whole counter is zero. That
signal is the output pulse `fy`, and it is also fed back as the load of every
slice. `fy` is one `clk` cycle wide. `fy_half` toggles on each `fy` and gives
a square wave at `fy/2`.

## Adaptive generator control

`fsynth_adapt` keeps the counts in a useful range. It acts on each capture:

* If C1 is below `LOW_TH` (default 1024), it halves the divide of both
  generators, which doubles `fc1` and `fc2`.
* If C1 is above `HIGH_TH` (default 2^23), or Counter 1 overran, it doubles
  the divide of both generators.

Both generators share the exponent `gen_exp`, so `fc1/fc2`, and with it the
output ratio, does not change. The change is made at the capture, just before
Counter 1 is cleared, so the next measurement uses the new rate throughout.
Counter 2 still counts one period of the previous number at the new rate.
That one output period is off by a factor of two. The control moves one step
per input period, between `gen_exp = 0` (full clock rate) and `2^EXP_W - 1`.

## Use in a PLL feedback path

A plain integer-N PLL locks `fo = N * fi`. If the synthesizer is placed after
the `/N` divider in the feedback path, the loop locks
`fo = fc1 * N * fi / (fc2 * k1)`. Fractional ratios then come from the
counters, not from dithering N. With `pll_mode = 1`, the synthesizer input is
`fo_in` divided by `n_div` (`fsynth_divn`), and `fy` is the feedback signal
for the phase detector.

The phase detector, loop filter and VCO are analog parts. They are not part of
this RTL. `fo_in` is sampled by `clk`, so it must stay below `f_clk / 2`. A
real design would clock the divider from `fo`.

## Parameters of `fsynth_top`

| parameter   | default      | meaning                                         |
|-------------|--------------|-------------------------------------------------|
| `C1_W`      | 24           | Counter 1 length (16 for the board version)     |
| `C2_W`      | 32           | Counter 2 length, multiple of `SLICE_W`         |
| `SLICE_W`   | 8            | Counter 2 slice width                           |
| `FRAC_W`    | 16           | fractional part and accumulator width           |
| `LOAD_CYC`  | 1            | LOAD length in clk cycles                       |
| `CLEAR_CYC` | 1            | CLEAR length in clk cycles                      |
| `DIV_W`     | 8            | generator base divide width                     |
| `EXP_W`     | 3            | adaptive exponent width                         |
| `LOW_TH`    | 1024         | adaptive: count too small below this            |
| `HIGH_TH`   | 2^(C1_W-1)   | adaptive: count too big above this              |
| `N_W`       | 16           | PLL divide number width                         |

With a 33.3 MHz clock and the defaults, `fx` can range from about 2 Hz
(16.65 M counts, just under 2^24) up to a few MHz. At the top of that range,
only a handful of counts remain per period.

## Ports of `fsynth_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | master oscillator; asynchronous active-low reset |
| `fx_in` | in | input frequency (asynchronous, sampled) |
| `fo_in`, `pll_mode`, `n_div` | in | VCO output, select `fo_in/n_div` as the input, N |
| `ctrl` | in | `g_ctrl_t`: `mul`, `shr`, `fine`, `fine_sub` |
| `corr_en` | in | fractional error correction on |
| `adapt_en` | in | adaptive generator control on |
| `gen1_div`, `gen2_div` | in | `fc = f_clk / (div * 2^gen_exp)`; 0 is read as 1 |
| `fy`, `fy_half` | out | output pulse per period; square wave at fy/2 |
| `valid` | out | output based on a complete measurement |
| `c1`, `m`, `r`, `acc` | out | register content, C2 integer and fraction, accumulator |
| `corr_carry`, `c2_reload` | out | correction carry; Counter 2 loads this cycle |
| `sat` | out | Counter 1 overran or C2 was clamped |
| `gen_exp` | out | generator exponent |
| `load`, `clear` | out | the LOAD and CLEAR pulses |

## Files

| file | contents |
|---|---|
| `rtl/fsynth_pkg.sv` | control word type and widths |
| `rtl/fsynth_top.sv` | the complete synthesizer |
| `rtl/fsynth_gen.sv` | generator 1/2 clock enables |
| `rtl/fsynth_loadclr.sv` | synchronizer and LOAD/CLEAR sequencer |
| `rtl/fsynth_counter1.sv` | Counter 1, saturating up counter |
| `rtl/fsynth_register.sv` | register and control function g |
| `rtl/fsynth_fracacc.sv` | correction accumulator and adder |
| `rtl/fsynth_counter2.sv`, `rtl/fsynth_dslice.sv` | Counter 2 and its slice |
| `rtl/fsynth_adapt.sv` | adaptive control |
| `rtl/fsynth_divn.sv` | PLL divide-by-N |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fsynth_top.sv` | end-to-end test at the default sizes |
| `tb/tb_fsynth_board.sv` | the 16-bit board measurements |
| `tb/tb_fsynth_range.sv` | 2 Hz and 6.2 MHz inputs at 33.3 MHz, default sizes |
| `tb/tb_fsynth_pll.sv` | the synthesizer in a closed loop with behavioural VCO and detector |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fsynth_pkg.sv \
    tb/tb_fsynth_top.sv --top-module tb_fsynth_top -Mdir obj_top
obj_top/Vtb_fsynth_top
```

`tb_fsynth_top` runs the default-size design end to end in under a minute. It
covers the following, and fails if any of them never happened:

* unity ratio with and without fine tuning
* subtraction
* shifts both ways
* x11 and x5.7 with correction (the total time of up to 200 output periods
  stays within one count of the ideal)
* x11 without correction (every period equals the integer part)
* unequal generators
* PLL mode through the divider
* Counter 1 overrun with a 17 M-cycle input period
* adaptive steps up and down

`tb_fsynth_board` builds two 16-bit instances, with dead times of 19 and 2
cycles. It checks:

* the constant count difference for inputs from 1502 Hz to 100 kHz at
  31.111 MHz, and its removal by fine tuning
* that the output follows the input up to 3.275 MHz
* the 476 Hz lower limit of a 16-bit counter

`tb_fsynth_range` runs the default design at a 33.3 MHz clock with inputs
at both ends of its range. At 2 Hz, the count is 16.65 M, just below 2^24. At
6.2 MHz, about 5.4 counts remain per period, and the mean output period still
matches the input period.

`tb_fsynth_pll` closes a loop around the synthesizer in PLL mode. A
behavioural oscillator stands in for the VCO, and a frequency detector with an
integrating filter stands in for the phase detector and loop filter. These
models exist only in the testbench. With N = 4 and C2 = 2.5 * C1, the loop
must settle at `fo = 10 * fi`, and the mean `fy` period must equal the
reference period.

The unit testbenches compare each module with a reference model written in
the testbench.

## Design choices and departures

* **Single clock.** The two generators are clock enables of one master clock,
  not separate oscillators, so the design has no clock-domain crossings. With
  `gen1_div = gen2_div = 1`, both run at the master clock.
* **One-shots.** The two RC one-shots that make LOAD and CLEAR are replaced by
  a synchronous sequencer with pulse lengths counted in clock cycles. Because
  of the added synchronizer, an `fx` edge acts 3 cycles late. An edge that
  falls inside LOAD or CLEAR is ignored.
* **g.** The general multiplier `mul` is an addition. It reaches ratios that
  are not powers of two, such as x11 and x5.7, which the source shows only in
  simulation. Shifts and the 23-bit fine tuning are the source's own
  mechanisms. Fine tuning is applied after scaling.
* **Overrun.** Counter 1 saturates and raises a flag instead of wrapping.
* **Widths chosen here.** Fraction and accumulator width (16), the
  adaptive-control thresholds, the factor-two steps and the choice to read C1
  were all chosen for this design.
* **Correction timing.** The correction accumulator steps once per output
  period, and its carry lengthens that period by one count of `fc2`.
* **Not included.** The PLL's phase detector, loop filter and VCO, and the
  crystal oscillator, are outside the RTL.

## Limits

* The output is a pulse or a square wave. There is no sine output.
* The highest usable input frequency is set by the count resolution. At a few
  counts per period the output jitters by one count.
* After a change of `fx` or of the control word, the output settles in about
  two input periods.
* After an adaptive step, one output period is wrong by a factor of two.
