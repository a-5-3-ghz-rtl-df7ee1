# Pipelined 32-bit phase accumulator with pulse-loaded pre-skewing

A direct digital frequency synthesizer (DDFS) makes a sine wave by adding a
frequency control word (FCW) to a phase register on every clock. The sine's
frequency is `FCW * f_clk / 2^32`. The phase accumulator is what limits the
clock rate. A 32-bit ripple-carry add is far too slow for a multi-GHz clock,
so the add is cut into short slices with a register between them.

This RTL describes such an accumulator: 32 bits, cut into 8 slices of 4 bits.
It was built for a GaAs HBT DDFS that ran at 5.3 GHz. The point of the design
is how a new FCW gets into the pipeline. A conventional design needs 144
flip-flops for this. Here it takes 41, and frequency changes stay phase
continuous.

## The pipeline and its skew

Each slice `k` (bits `4k+3 .. 4k`) is a 4-bit ripple adder closed on its own
4-bit phase register (`rca_pipe_stage`). Its carry out goes into a flip-flop,
and slice `k+1` adds that carry one clock later. The clock period is
therefore set by one 4-bit carry chain, not a 32-bit one. The cost is
**skew**: slice `k` works on the sum that slice 0 worked on `k` clocks
earlier. Take a plain accumulator `A[n] = A[n-1] + F[n]`. After clock `n`,
slice `k` holds bits `4k+3 .. 4k` of `A[n-k]`.

For this to add whole words correctly, slice `k` must also see FCW word
`F[j]` `k` clocks after slice 0 does. This input skew is called
pre-skewing. The truncated output needs the opposite fix, de-skewing, so
that all the bits it keeps describe the same `A[j]`.

The 40 flip-flops of the adder are 32 phase bits plus 8 slice carries.
The MSB carry (`carry_out`) is high for one clock each time the 32-bit
phase wraps. Its average frequency is the DDFS output frequency.

## Pre-skewing with a travelling load pulse

A conventional design delays FCW slice `k` through `k+1` registers. That is
`N*(M+1)/2 = 144` flip-flops for N = 32 bits and M = 8 slices, all toggling
at the full clock rate.

This design keeps the FCW in a single register per bit (`preskew_bank`).
Instead of delaying the data, it delays a one-cycle **load pulse**
(`strobe_gen`):

* Two flip-flops sample `fcw_store`. `str[0]` is their rising-edge detect,
  so it lasts exactly one clock however long `fcw_store` stays high.
* A cascade of seven flip-flops produces `str[1] .. str[7]`, each one clock
  after the previous one.
* `str[k]` writes FCW slice `k` from the `fcw` input.

The new word therefore reaches slice `k` exactly `k` clocks after slice 0,
the same skew the conventional delay chains give. The cost is
`32 + 2 + 7 = 41` flip-flops, 29 % of 144. Between loads the FCW registers
do not change.

The catch: each slice copies its bits straight from the `fcw` input, at its
own time. **`fcw` must stay stable for M+1 = 9 clocks**, from the clock
that first sees `fcw_store` high through the last load pulse. If it does
not, the slices load parts of different words.

A load changes only the increment, never the phase, so the output frequency
switches without a phase jump.

## De-skewing the truncated output

The DDFS uses only the top 11 phase bits, `[31:21]`. The top slice (bits
31:28) has the most delay, so `deskew_bank` delays the other kept bits to
match it:

| bits  | slice | extra delay |
|-------|-------|-------------|
| 31:28 | 7     | 0           |
| 27:24 | 6     | 1 clock     |
| 23:21 | 5     | 2 clocks    |

That is 10 flip-flops. `phase` and `carry_out` are aligned with each other.

## Interface and timing (`phase_accumulator_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | accumulator clock |
| `rst_n`     | in  | 1     | asynchronous, active-low reset; clears every register |
| `fcw`       | in  | N     | frequency control word |
| `fcw_store` | in  | 1     | load request; its rising edge counts; synchronous to `clk` |
| `phase`     | out | OUT   | `A[N-1 -: OUT]`, de-skewed |
| `carry_out` | out | 1     | one-clock pulse per wrap of the N-bit phase |

Parameters: `N = 32`, `M = 8`, `OUT = 11`. The defaults are in package
`pa_pkg`. N must be a multiple of M, and OUT must not exceed N. A wider
accumulator, for example N = 48 with M = 12, needs only these parameters
changed.

Timing, counting clock edges:

* Let `T` be the first edge that sees `fcw_store` high. Slice 0 adds the new
  word from edge `T+2` on. Slice `k` adds it from edge `T+2+k`.
* After edge `n`, `phase = A[n-7][31:21]` and `carry_out` is the carry of
  the update at edge `n-7`. Here `A` is the ideal accumulator in slice-0
  time.
* After reset, the phase and the FCW are both 0. Nothing accumulates until
  the first load.

For example, with `FCW = 0x00214AC3` the carry recurs every 1968 or 1969
clocks (2^32 / FCW = 1968.5). At a 5.3 GHz clock that is 2.692 MHz. With
`FCW = 0x7F161391` it recurs every 2 or 3 clocks. At 4.7 GHz that is
2.333 GHz.

## Files

`rtl/` holds one unit per file:

* `pa_pkg.sv`: default sizes.
* `full_adder.sv`: the sum cell (XOR3) and the carry cell (majority).
* `rca_pipe_stage.sv`: one 4-bit slice with sum and carry flip-flops.
* `pipelined_accumulator.sv`: the 8 slices and their carry hand-off.
* `strobe_gen.sv`: the load-pulse generator.
* `preskew_bank.sv`: the 32 pulse-loaded FCW registers.
* `deskew_bank.sv`: the output alignment registers.
* `phase_accumulator_top.sv`: the top level.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
compares against an independent integer model and prints
`TB_RESULT checks=... failures=...`.

`tb_phase_accumulator_top` runs the top at its default sizes. It checks
`phase` and `carry_out` every clock against a plain 32-bit accumulator,
through the following cases:

* reset;
* `FCW = 0x00214AC3`, checking the carry period;
* a switch to `FCW = 0x7F161391` while the phase is running, checking the
  carry period and the wrap count;
* 200 random loads, with store pulses of varying length and `fcw` scrambled
  between loads.

It also counts every mechanism (loads, long store levels, switches on a
running phase, inter-slice carries, wraps, ignored `fcw` changes) and fails
if one of them never occurs.

`tb_phase_accumulator_48` builds the top at N = 48, M = 12 (still 4-bit
slices). This is the high-resolution width the architecture can be extended
to. It checks every cycle against a 48-bit model while loading random words.

The top also holds a concurrent assertion that `fcw` does not change while
`str[1..7]` are active. It fires under `verilator --assert` if a load
violates the hold rule.

To simulate:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pa_pkg.sv tb/tb_phase_accumulator_top.sv --top-module tb_phase_accumulator_top
./obj_dir/Vtb_phase_accumulator_top
```

To run another testbench, substitute its name. Each testbench finishes in
well under a second.

## Where this RTL departs from the original circuit

* **Clocking of the FCW registers.** The original clocks the FCW registers
  directly with the load pulses. Here the pulses are synchronous clock
  enables on the single accumulator clock. The cycle behaviour is the same,
  and the design stays single-clock.
* **Edge detect.** The split of the 9 pulse flip-flops into a two-flip-flop
  edge detect plus a seven-flip-flop cascade is inferred from the 41-register
  total.
* **Reset and hold time.** The reset, and the requirement that `fcw` be held
  for 9 clocks, are this design's own choices.
* **De-skew register count.** The de-skewing is the minimal 10-flip-flop
  arrangement. The original's de-skew registers take 29 % of its power,
  which suggests more hardware there, but their number is not known.
* **Analog parts are not modelled.** This covers the circuit-level work
  behind the original: three-level current-mode gates, the transistor
  sizing and bias optimisation of the carry and sum cells, and the
  3.8 mm differential clock traces with their delay cell, drivers and
  multiple pi-type terminations. It also covers the differential trigger
  input and the 50-ohm carry-out driver. The RTL takes an ideal `clk`, a
  single-ended `fcw_store`, and brings `carry_out` out as a plain port.
* **Phase-to-amplitude stage.** The DDFS stage that turns `phase` into a
  sine is outside this design.
* **Clock rate.** The 5.3 GHz figure belongs to the GaAs circuit. In a
  standard-cell flow the critical path is one 4-bit ripple carry plus a
  flip-flop.
