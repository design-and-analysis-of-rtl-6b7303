# Stochastic flash ADC with bank-switched variable gain

A conventional flash ADC needs 2^n - 1 comparators. Each one sits on a tap
of a precise resistor ladder and needs offset calibration. A *stochastic*
flash ADC does without both. It uses many minimum-size comparators, all fed
the same differential input, and sets no threshold on any of them. Device
mismatch gives every comparator a random offset, and that offset becomes its
threshold. So the number of comparators that decide "high" grows with the
input and follows the cumulative distribution of the offsets, a Gaussian
CDF. Over roughly ±1 σ of the offset spread this is close enough to a linear
transfer function to serve as an ADC. The whole converter is standard
cells: each comparator is two cross-coupled NAND3 gates and a NOR2 latch,
and a pipelined adder tree counts the ones.

This design adds one thing on top: **gain set by how many comparators take
part**. The comparators are split into three banks with separate enables.
Say the input is strong, as at the start of an ultrasound receive interval.
Then one bank (256 comparators) is enough. As the echo fades, more banks are
switched on. The output code for the same input grows (×2 per step), and the
extra comparators keep a weak signal resolved. A front-end variable-gain
amplifier is therefore not needed.

The reference configuration is 1024 comparators, an 11-bit output code,
100 MS/s, and a 20 MHz input.

## Signal path

```
 inp, inn ──►┌──────────────────────┐ q[1023:0] ┌──────────────────────┐
 (codes)     │ sadc_comparator_bank │──────────►│  sadc_ones_counter   │──► dout[10:0]
             │ 1024 × sadc_comparator│          │ pipelined Wallace tree│
             │ bank 0: 0-255         │          │ 16 FA stages + adder  │
             │ bank 1: 256-511       │          └──────────────────────┘
             │ bank 2: 512-1023      │
             └──────────▲───────────┘
 gain[1:0] ──► sadc_bank_ctrl ── bank_en[2:0]
```

| file | what it is |
|---|---|
| `rtl/sadc_pkg.sv` | input code type, offset model, Wallace-tree shape functions |
| `rtl/sadc_comparator.sv` | behavioural model of one comparator cell |
| `rtl/sadc_comparator_bank.sv` | comparator array with its per-comparator offsets and bank masking |
| `rtl/sadc_bank_ctrl.sv` | gain code to thermometer bank enables |
| `rtl/sadc_full_adder.sv` | 3:2 full-adder cell |
| `rtl/sadc_ones_counter.sv` | pipelined Wallace-tree ones-counter |
| `rtl/sadc_top.sv` | the converter |

In the original implementation the converter is stacked on two dies. The
comparator array is on one die and the ones-counter on the other, joined by
one through-silicon via per comparator output. In the RTL that split is just
the `q` bus between the two instances. The vias, pads, transducer array and
analog pre-amplifier have no logic and are not modelled.

## The comparator and how the analog input is represented

The real cell is clocked. While `clk` is low, both NAND3 outputs are high
and the NOR2 latch output is low. When `clk` rises, the two NAND3 gates race,
and the one whose input transistor is driven harder wins. The latch then
shows the decision until `clk` falls again. The offset of a cell is whatever
its mismatch makes it. None of this can be written as logic, so
`sadc_comparator` is a **behavioural model** with the real cell's ports
(`inn`, `inp`, `clk`, `q`):

* The analog inputs are signed 16-bit codes (`sadc_pkg::vin_t`). The only
  scale that matters is the offset spread: σ = `SIGMA_CODES` = 2048 codes.
  So the useful input range ±σ is ±2048 codes, and the code range reaches
  ±16 σ.
* Each cell has a fixed `OFFSET` parameter. On every rising edge it decides
  `q = (inp - inn > OFFSET)`. Here `inp - inn` is computed in 17 bits, so
  the difference cannot overflow.
* The model holds `q` for the whole cycle. The real cell returns to zero
  while `clk` is low, but the counter samples at the falling edge, before
  that happens. So the counter sees the same value either way.

The offsets come from `sadc_pkg::comp_offset(i, SEED, SIGMA)`. It works as
follows:

* A hash of the comparator index and a seed starts a linear congruential
  generator.
* Twelve 16-bit uniform draws are added. Their sum has mean 393216 and
  standard deviation exactly 65536.
* The sum is centred and scaled to σ (the Irwin–Hall approximation of a
  Gaussian, truncated at ±6 σ).

`SEED` picks a different "die". Each comparator takes its offset as an
elaboration-time constant, so synthesis treats the array as ordinary logic.
It merges comparators that happen to get the same offset.

## Banks and gain

Comparator `i` belongs to bank `b`, the first bank with
`i < N_COMP >> (N_BANKS-1-b)`. With the defaults the cumulative sizes are
256, 512 and 1024. A comparator in a disabled bank always outputs 0.

`sadc_bank_ctrl` turns the gain code `gain` (the number of banks to enable,
0 to 3) into the thermometer code `bank_en`, bank 0 first. It registers the
code on the rising edge, the same edge on which the comparators decide. So
the gain present at that edge applies to that whole sample, and a sample can
never be counted with half-switched banks. Codes above `N_BANKS` are clamped.
That can only happen when `N_BANKS + 1` is not a power of two, so it never
occurs at the default of 3 banks. Gain 0 turns every bank off. Reset
(`rst_n` low, asynchronous) enables all banks. A concurrent assertion in
`sadc_bank_ctrl` checks, out of reset, that the enables always form a
thermometer code.

The enables do not gate the comparator clocks. Gating them would save power
in silicon, but the function would be the same.

## The ones-counter: a pipelined Wallace tree

This is the part most worth understanding before changing anything.

Think of the 1024 comparator outputs as 1024 bits in one *weight column*,
weight 1. Every pipeline stage does the same thing to every column:

1. It takes the column's bits three at a time and feeds each group to a
   full adder (`sadc_full_adder`). The sum bit stays in the column. The
   carry bit goes to the next column up.
2. The one or two bits left over pass through unchanged.
3. A register captures the new column contents.

So the first stage computes `q[0]+q[1]+q[2]`, `q[3]+q[4]+q[5]`, and so on. It
leaves 342 bits of weight 1 and 341 bits of weight 2. The second stage does
the same to both columns, and so on. A column of height h becomes
`h/3 + h%3` bits plus `h'/3` carries from the column below, where h' is
that column's height. Once no column holds more than two bits, a final
registered two-row adder gives the binary count.

The column heights at every stage are worked out at elaboration by the
constant functions in `sadc_pkg`:

* `wt_height(n, stage, col)` replays the reduction.
* `wt_offset` and `wt_total` place each column's bits in the flat `r`
  vector of each stage. Within a column, the sums come first, then the
  pass-through bits, then the carries from the column below.
* `wt_stages(n)` gives the number of full-adder stages.

The generate loops in `sadc_ones_counter` read these numbers as
`localparam`s. Each stage therefore instantiates exactly the full adders it
needs, with no unused bits.

For 1024 inputs there are 16 full-adder stages plus the final adder. The
height shrinks by about 1.5× per stage down to a few bits per column. The
last few stages only move single carries up. 2048 inputs need 18 stages.
The top column has weight 2^10. A carry out of it would have weight 2^11,
but the count never exceeds 1024, so that carry is always zero and is not
built. The top column uses a plain XOR for its sums.

Every counter register, and the output register, clocks on the **falling**
edge. The counter has no reset. After power-up the first `LATENCY` outputs
are garbage, and after that the pipeline has flushed itself.

## Timing

* One sample per clock. At rising edge k the comparators decide on the
  input present there, with the gain present there.
* Falling edge k loads the first counter stage.
* The count of sample k appears after falling edge k + LATENCY - 1. It can
  be read at rising edge k + LATENCY.
* `LATENCY = wt_stages(N_COMP) + 1`, which is 17 cycles for 1024 comparators.

The 1024-comparator implementation was closed at 100 MHz, with a gate-level
maximum of about 0.5 GHz. In the RTL every counter stage is one full adder
between two falling-edge registers, a whole cycle. The path from the
comparators (rising edge) to the first stage has half a cycle. The last
stage is an 11-bit adder.

## What it does in simulation

With the default seed and all banks on, the output code is:

| input | output code | Gaussian CDF × 1024 |
|---|---|---|
| −σ | 170 | 162 |
| 0 | 529 | 512 |
| +σ | 864 | 862 |

The codes come from `tb_sadc_top`. The small deviations are the sampling
noise of one set of 1024 random offsets.

`tb_sadc_sine` applies a 20.02 MHz sine sampled at 100 MS/s (205 periods
in 1024 samples, so the sampling is coherent). It fits the known frequency
and reports SNDR:

| amplitude | 1 bank (256) | 2 banks (512) | 3 banks (1024) |
|---|---|---|---|
| σ | 26.8 dB | 26.6 dB | 28.4 dB |
| σ/4 | 15.1 dB | 17.0 dB | 26.7 dB |

The fundamental doubles with each bank step (92, 183, 359 codes at
amplitude σ). For comparison:

* The original 1024-comparator design reports 28.5 dB SNDR in post-layout
  simulation.
* A uniform-threshold estimate gives SQNR = 10·log10(N/2), which is 27 dB
  for N = 1024.

At full amplitude the SNDR is limited by the curvature of the Gaussian CDF,
not by quantisation, so more comparators help little. At σ/4 the curvature
matters little and the number of comparators dominates. This is the
variable-gain use case: a weak input with all banks on keeps almost the SNDR
of a strong input.

28.4 dB corresponds to about 4.4 effective bits, in line with the rule that
a stochastic flash converter needs about 4^n comparators for n bits. No
linearisation (an inverse-CDF table, for example) is part of this design.
The output is the raw count.

## Departures from the original design and choices made here

The following are taken from the original design:

* the comparator cell's structure
* 1024 comparators
* three separately enabled banks
* the full-adder tree with a register after every stage, clocked on the
  falling edge

The following were not specified and were chosen here:

* **Bank sizes** of 256, 256 and 512 (cumulative ×2 steps).
* **Gain encoding** as a count of banks, a thermometer enable, and the
  registered enables and their reset. Where the gain code comes from (a
  time-gain schedule) is left to the system, so `gain` is an input.
* **Tree details**: leftover bits pass through, reduction stops at two bits
  per column, and a final carry-propagate adder produces the code.
* **Input and offsets**: the fixed-point input representation, the Gaussian
  offset generator, and the model's sign convention (`q` high when
  `inp - inn` is above the offset).
* **Disabled comparators** are masked to 0 rather than clock-gated.
* **No datapath reset.**
* **An 11-bit output code**, so that the full-scale count of 1024 does not
  wrap.

The comparator is a behavioural model. Its decision is ideal: there is no
noise, metastability or input-dependent delay. So the RTL says nothing about
the real cell's timing, power or noise. The gate-level and block-level
comparator variants, the 2D versus 3D layouts and the through-silicon-via
coupling-noise studies are physical-design topics. None of them is
represented in the RTL.

## Simulating

Every file is plain IEEE 1800-2017. With Verilator 5, build and run the
end-to-end test like this:

```
verilator --binary --timing --assert -Irtl \
  rtl/sadc_pkg.sv rtl/sadc_full_adder.sv rtl/sadc_ones_counter.sv \
  rtl/sadc_comparator.sv rtl/sadc_comparator_bank.sv rtl/sadc_bank_ctrl.sv \
  rtl/sadc_top.sv tb/tb_sadc_top.sv --top-module tb_sadc_top -o sim
./obj_dir/sim
```

The full-size top takes about a minute to compile and well under a second
to run. The other testbenches follow the same pattern:

* `tb_sadc_sine` and `tb_sadc_sine_2048`: need the full file list.
* `tb_sadc_ones_counter`: needs `sadc_pkg`, `sadc_full_adder` and
  `sadc_ones_counter`.
* `tb_sadc_comparator_bank`: needs `sadc_pkg`, `sadc_comparator` and
  `sadc_comparator_bank`.
* `tb_sadc_comparator`, `tb_sadc_bank_ctrl`, `tb_sadc_full_adder`: need
  their module and `sadc_pkg`.

Every testbench checks its results itself and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog that stops a hung
simulation.

* `tb_sadc_top` compares every output code, at default parameters, with a
  count the testbench works out from the same offset model. It also checks
  the CDF points above and the gain ratio. It counts each gain setting, gain
  switches, full-scale and zero codes, and fails if any of them never
  happened.
* `tb_sadc_sine_2048` repeats the sine test on the 2048-comparator version
  (SNDR 28.9 dB with all banks, against 30 dB from the uniform-threshold
  estimate).
* `tb_sadc_ones_counter` checks 1024-, 7- and 100-input counters against
  `$countones`, with the exact latency.

## Changing it

* `N_COMP`: the number of comparators. It must be a multiple of
  2^(N_BANKS-1). The output width and the latency follow automatically.
  `N_COMP = 2048` gives the larger version (12-bit code, latency 19).
* `N_BANKS`: more banks give finer gain steps, each doubling the active
  comparators. The `gain` width is `$clog2(N_BANKS+1)`.
* `SEED`: another random offset pattern, i.e. another die.
* `SIGMA` and `sadc_pkg::VIN_W` / `SIGMA_CODES`: the input scale. Keep the
  offsets (up to ±6 σ) inside the code range.

The testbenches derive their expected values from `sadc_pkg`. If you change
the offset model, the expected values follow it. The fixed CDF checks in
`tb_sadc_top` assume a Gaussian of `SIGMA_CODES`.
