# Two-lane polyphase resampler, 500 MHz to 600 MHz

This is a FIR filter that changes a sample stream's rate by the rational factor
f = 6/5, from 500 MHz to 600 MHz. It is meant to feed a DAC in a broadband
transmitter. The filter also does the pulse shaping, so the resampling must be
exact: every output sample is the output a real interpolating filter would
produce at the true output instant. Rounding the sampling instants causes
intersymbol interference.

The exact way to resample is to zero-stuff the input up to the least common
multiple of the two rates (F_i = 3 GHz), low-pass filter it, and keep every
fifth sample. Nobody clocks a filter at 3 GHz, and 600 MHz is already too fast
for the multipliers of a mid-range FPGA. This design does both things:

* It is a **polyphase** filter. Only the phase of the filter that lands on an
  output instant is computed, and a small state machine picks that phase
  exactly, with no phase accumulator and no rounding.
* It has **two lanes at half rate**. The datapath runs at 300 MHz and computes
  an even and an odd output sample every clock. The two lanes share **one**
  delay line. That delay line can shift by one or two places, and a row of
  multiplexers lets the second lane read the same data as the first when it
  needs to.

The defaults are N = 6 polyphase branches, step D = 5, 16-bit data and
coefficients, 21 taps per branch (a 126-tap prototype at 3 GHz), and
2 × 21 = 42 multipliers.

## Polyphase resampling with an exact index sequence

Let `h[l]`, l = 0 … N·TAPS−1, be the prototype filter at the intermediate rate.
Output sample k sits at intermediate index k·D. Only every N-th intermediate
sample of the zero-stuffed input is non-zero, so

    y[k] = Σ_j h[s_k + N·j] · x[n_k − j],   s_k = k·D mod N,   n_k = ⌊k·D / N⌋

Output k is therefore polyphase branch `s_k` (taps `h[s_k], h[s_k+N], …`)
applied to the input window that ends at sample `n_k`. The branch index obeys
s[k+1] = (s[k] + D) mod N. For N = 6, D = 5 it runs 0, 5, 4, 3, 2, 1, 0, …, and
six outputs use five inputs. Whenever s[k+1] > s[k], two consecutive outputs
use the **same** input window: the input does not advance between them. That
is how f > 1 shows up in the hardware.

## Two lanes on one delay line

The datapath clock is F_t/2. In clock c, lane DL1 computes the even output
y[2c] and lane DL2 computes the odd output y[2c+1]. Their branch indices follow
a recurrence that steps by 2D:

    s1[c+1] = (s1[c] + 2D) mod N,  s1[0] = 0
    s2[c+1] = (s2[c] + 2D) mod N,  s2[0] = D

For N = 6, D = 5 this repeats every three clocks:

| clock c | outputs | s1 | s2 | DL1 window ends at | DL2 window ends at | DL2 shares DL1's window | new samples afterwards |
|---|---|---|---|---|---|---|---|
| 0 | y0, y1 | 0 | 5 | x[0] | x[0] | yes | 1 |
| 1 | y2, y3 | 4 | 3 | x[1] | x[2] | no  | 2 |
| 2 | y4, y5 | 2 | 1 | x[3] | x[4] | no  | 2 |
| 3 | y6, y7 | 0 | 5 | x[5] | x[5] | yes | 1 |

A datapath clock normally consumes two input samples, because two outputs are
produced. After a "same window" clock it consumes only one. That makes five
samples per three clocks, which is exactly 500 MHz against 300 MHz.

**The physical delay line** (`pdl`) has TAPS+1 = 22 registers, with `taps[0]`
the newest. The invariant at the start of every clock is that `taps[1]` holds
x[n_2c], the newest sample of DL1's window, and `taps[0]` holds the sample after
it.

* DL1 always multiplies `taps[1..TAPS]`.
* DL2 multiplies `taps[0..TAPS-1]`, one sample ahead, when n_2c+1 = n_2c + 1.
  When both outputs share a window (s1 + D < N), a 2:1 multiplexer in front of
  each DL2 multiplier selects `taps[1..TAPS]` instead.
* After the clock, the line shifts by ⌊(s1 + 2D)/N⌋ places. After a shared
  window that is one place. DL1 then moves on by one sample and DL2, whose
  multiplexers return to normal, moves on by two, so DL2 is one sample ahead
  again. Otherwise the line shifts by two places.

Each register of the line sits behind a 2:1 multiplexer. Register 0 chooses
between the two input ports, register 1 between register 0 and `input2`, and
register i between registers i−1 and i−2. The line is fed two samples per
clock: `input2` is the oldest sample not yet taken and `input1` the one after
it.

* Shift by two: `taps[0] ← input1`, `taps[1] ← input2`.
* Shift by one: `taps[0] ← input2`.

After reset the line is zero. The first step of the state machine only loads
x[0] and x[1] and produces no output, so y[0] sees zeros before x[0], exactly
like a filter starting from rest.

**The index state machine** (`index_fsm`) holds s1 and s2 as registers and
advances them through a next-state table computed at elaboration time, so the
loop has no adder or modulo operator. The same table, indexed by s1, gives the
shift amount (`shift_amt`, `shift_one`) and the DL2 select (`dl2_same`). The
pattern repeats after N/gcd(N, 2D) clocks: 3 for the default.

## Blocks

```
resampler_top
├── input_fifo        dual-clock buffer, 1 sample in per clk_in, 0..2 out per clk_core
├── resampler_core    300 MHz datapath
│   ├── index_fsm     s1, s2, shift control, DL2 select (lookup tables)
│   ├── pdl           22-register shift-by-one-or-two delay line
│   ├── (DL2 muxes)   21 × 2:1 multiplexers, inside resampler_core
│   ├── coef_rom ×2   branch index → 21 coefficients (LUT ROM)
│   └── mac ×2        21 multipliers + pipelined adder tree per lane
└── ps_converter      pair → serial at clk_out (even sample first)
```

`resampler_pkg` holds the default sizes and the elaboration-time functions:
the index tables and the root-raised-cosine prototype.

## Clocks, interfaces and timing

| Clock | Rate (reference) | Domain |
|---|---|---|
| `clk_in` | F_s = 500 MHz | write side of `input_fifo` |
| `clk_core` | F_t/2 = 300 MHz | read side of the FIFO, `resampler_core` |
| `clk_out` | F_t = 600 MHz | `ps_converter` |

`clk_core` must be `clk_out` divided by two, with rising edges aligned. Each
domain has its own synchronous, active-low reset.

**Input.** Samples are presented with `in_valid`/`in_ready`, one per `clk_in`
cycle. The FIFO holds 16 samples. Its pointers cross the clock domains in Gray
code through two-flop synchronisers. The read side may remove two samples in
one clock, so the read pointer is passed to the write side divided by two: its
Gray code then changes only one bit per clock. As a result the writer may see
the buffer full one entry early, but never late.

**Datapath.** The core waits until 8 samples are buffered, then steps whenever
the buffer holds as many samples as the step will take. If the input runs dry
it stalls (`core_stall`) and resumes without losing its place. A step's output
pair appears 8 `clk_core` cycles later:

* 1 cycle for operand registers,
* 1 cycle for product registers,
* 5 cycles for adder-tree levels,
* 1 cycle for output rounding.

At matched rates (`clk_in` : `clk_core` = 5 : 3) the core steps on every
clock, and `out_valid` stays high on every `clk_out` cycle.

**Output.** Each lane's 37-bit sum is rounded by adding 2^13 and shifting right
by 14. It is then saturated to 16 bits. `ps_converter` emits y1 (even) and then
y2 (odd) on consecutive `clk_out` cycles, 1 to 2 `clk_out` cycles after the
pair appears.

## Filter coefficients

The resampler reuses the transmit pulse-shaping filter. The prototype is a
root-raised cosine:

* roll-off 0.1,
* 6 samples per input symbol,
* 126 taps, centred between taps 62 and 63 so that it is symmetric,
* scaled by 2^14 and rounded to 16 bits.

Each polyphase branch then has a DC gain close to 1.0 (about 16384 in the
output scale), and the peak coefficient is about 1.03 × 2^14.
`resampler_pkg::rrc` computes the table at elaboration time with `$sin`,
`$cos` and `$sqrt`, so the table appears nowhere as a list of numbers. To use
another filter, change `proto_coef`. Coefficient l must be the prototype value
at intermediate index l, with branch p tap j = h[p + N·j].

## Size

The published FPGA prototype reports the following on a Kintex-7:

* 42 DSP multipliers,
* about 1600 registers,
* about 1000 LUTs.

This RTL has the same 42 multipliers (2 lanes × 21 taps). Its register count
is of the same order:

* 22 × 16 bits for the delay line,
* about 1300 bits of operand registers (data and coefficients of both lanes),
* the product and adder-tree pipelines.

How many of these registers a synthesis tool folds into DSP blocks depends on
the device.

## What follows the method, and what is this design's choice

Taken from the method:

* the polyphase structure and the exact index recurrence with both lanes,
  s1[0] = 0 and s2[0] = D;
* the index logic built as a table-driven state machine;
* two lanes at half the output rate, even samples from DL1 and odd samples
  from DL2;
* a single delay line with one extra register in front, shifting by one or
  two places, with the multiplexer wiring of each stage;
* multiplexers that give DL2 the DL1 window;
* pipelined multiply-add lanes, coefficients in LUTs, and 16-bit data and
  coefficients;
* N = 6, D = 5.

This design's own choices:

* **21 taps per branch.** This is read from the published prototype's 42
  multipliers (21 per lane).
* **The root-raised-cosine coefficients.** The method uses such a pulse for
  its analysis, but the prototype's filter values are not published.
* **The clocking and interfaces:** the dual-clock FIFO, the prefill, the stall
  behaviour and the phase-bit serialiser.
* **The first loading step after reset.**
* **The multiplier pipeline split.**
* **Output rounding and saturation.**
* **Which multiplexer input each level of `shift_one` selects.** The wiring of
  the stages is given; the select polarity follows from `input2` being the
  older sample.

Not included:

* **The Barker phase-accumulator index generators.** The method compares
  against them, and they produce inexact, time-varying decimation.
* **The two-separate-delay-lines version with its data switching block.** It
  is an intermediate step that the single delay line replaces.
* **A direct adder-and-modulo form of the index recurrence.** The method
  mentions it as a slower, more flexible option.
* **The DAC.**
* **Parallelism above two lanes.**

`resampler_core` needs 1 ≤ D ≤ N (up-sampling or unity). A filter for complex
signals uses one instance per rail (I and Q).

## How far it has been checked

Every block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_resampler_top` | Whole design at default parameters, three clocks in exact ratio. 3000 output samples are compared with a direct intermediate-rate convolution (zero-stuff, filter, keep every 5th). It also checks that `out_valid` is high on every output clock in steady state and that 5 samples are taken per 3 datapath clocks. The buffer is made to fill (input running while the datapath is in reset) and to run dry (input pause → stall). Shift-by-one, shift-by-two and shared-window steps are counted and must occur in a 1:2 ratio. |
| `tb_resampler_core` | Datapath with a modelled buffer, including starvation. Output pairs are compared with the polyphase formula, the latency of 8 clocks is checked, and so is one pair per clock while the input keeps up. |
| `tb_resampler_core_f52` | The same at f = 5/2 (N = 5, D = 2), where some steps take no new sample and the delay line holds. |
| `tb_index_fsm` | s1, s2, the DL2 select and the shift amounts against ⌊kD/N⌋, for N=6, D=5 and N=7, D=4, with a random `step`. |
| `tb_pdl` | All 22 registers against a queue model under random shift-by-one, shift-by-two and hold. |
| `tb_coef_rom` | Every coefficient against an independent RRC evaluation (±1 LSB), symmetry, DC gain per branch, and zeros for indices 6 and 7. |
| `tb_mac` | Random and full-scale operands, exact sums, and a latency of 7. |
| `tb_input_fifo` | Order, no loss, conservative count and full flags, with double pops, at 6/10 ns and 7/10 ns clock pairs. |
| `tb_ps_converter` | Order and continuity of the serial stream. |

Not checked: timing closure at 300 MHz on any device, and behaviour with
truly asynchronous, drifting input and output clocks over long runs.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/resampler_pkg.sv tb/tb_resampler_top.sv --top-module tb_resampler_top
./obj_dir/Vtb_resampler_top
```

Replace the testbench name to run another one. All of them finish in seconds.

## Changing the design

* **Other rates.** Set `N = F_i/F_s` and `D = F_i/F_t` with F_i the least
  common multiple, keeping D ≤ N. The index tables and coefficient layout
  follow automatically. With 2D < N the delay line sometimes holds still
  (shift amount 0); this is supported.
* **Filter length.** Set `NT` (taps per branch). The adder tree pads to a power
  of two, and its depth sets the latency.
* **Word widths.** `DW`, `CW`, `OW`, `FRAC`. The accumulator always keeps full
  precision.
* **Buffer size and start level.** `FAW` (log2 depth) and `START`. Keep `START`
  well below the depth, and above 2 plus the synchroniser delay, so that
  matched-rate operation never stalls.
