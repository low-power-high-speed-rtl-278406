# 18-band multirate IFIR quasi-ANSI 1/3-octave filter bank

A hearing aid amplifies each frequency region by a different amount, following a
prescription such as NAL-NL1. The prescriptions are specified at the ANSI S1.11
1/3-octave centre frequencies. A filter bank whose bands sit exactly on those
frequencies can therefore match a prescription almost exactly. The catch is cost:
true ANSI 1/3-octave filters have very long impulse responses at low frequencies,
which means a large group delay and a lot of arithmetic.

This RTL implements a *quasi*-ANSI bank. It uses relaxed filter specifications,
so every band meets a 10 ms group-delay budget. It keeps the cost low with three
techniques:

* **IFIR and multirate.** The six highest bands are computed with three short
  prototype filters, H18, H17 and H16. Those same three filters then run again at
  half rate and at quarter rate, on signals decimated by the IFIR interpolators
  I_A1 and I_A2. Because of the noble identity, H(z²) at fs, followed by
  decimation by 2, is the same as H(z) after the decimator. So one set of
  coefficients serves three octaves, and the lower octaves cost half or a quarter
  of the operations. The nine lowest bands, H9..H1, run at fs/4.
* **Linear phase everywhere.** Every sub-filter is odd-length and symmetric.
  Each multiplier therefore serves a tap pair, and only half of the coefficients
  are stored.
* **A small MAC engine shared in time.** One clock of 33 × fs (792 kHz for
  24 kHz audio) drives 3 + 1 + 4 multipliers. Each group of multipliers is
  dedicated to one of the three delay lines.

The design is built in two layers:

* `afb_top` is the **analysis filter bank**. It produces the 18 band signals.
* `fb_top` adds **alignment buffers** and a **synthesis filter bank**.
  - The alignment buffers delay every band so that all bands have the same total delay.
  - The synthesis bank adds the bands back into one full-rate signal.

  Every path through the chain then has the same delay, 248 input samples
  (10.3 ms at 24 kHz), so the whole bank is linear phase. With unity band gains
  the output is the input delayed by 248 samples, filtered by the sum of the band
  responses. How flat that sum is depends on the coefficients loaded.

The per-band gain and compression (WDRC) stage that would sit between analysis
and synthesis in a hearing aid is **not** part of this RTL. Its insertion point is
brought out as `aligned_out` / `aligned_upd`.

## Structure

```
            fs                         fs/2                     fs/4
in ──► delay line 1 (49) ──I_A1,↓2──► delay line 2 (39) 
            │  3 MACs      ──I_A2,↓4──────────────────────► delay line 3 (99)
            │                              │ 1 MAC                │ 4 MACs
        H18 H17 H16                    H18 H17 H16        H18 H17 H16 H9 … H1
        band 18 17 16                  band 15 14 13      band 12 11 10 9 … 1
```

Each sub-filter has its own tap length. The delay lines together hold 187
samples.

| sub-filter | I_A1 | I_A2 | H18 | H17 | H16 | H9…H4 | H3 | H2 | H1 |
|---|---|---|---|---|---|---|---|---|---|
| taps N | 35 | 49 | 29 | 33 | 39 | 89 each | 97 | 97 | 99 |
| stored words (N+1)/2 | 18 | 25 | 15 | 17 | 20 | 45 each | 49 | 49 | 50 |
| coefficient base address | 0 | 18 | 43 | 58 | 75 | 95,140,185,230,275,320 | 365 | 414 | 463 |

That is 513 coefficient words in total. The table is computed in `afb_pkg`
(`TAPS`, `coef_base`), so changing a tap length updates the following:

* the memory map,
* the schedule,
* the alignment depths.

### Module map

| module | role |
|---|---|
| `afb_pkg` | filter list (`filt_e`), tap lengths, line/band mapping, cycle-count and delay formulas |
| `afb_controller` | input handshake; decides when each line shifts and hands over; three `afb_line_seq` sequencers |
| `afb_line_seq` | steps one line through its sub-filters, P coefficient pairs per cycle |
| `afb_delay_line` | shift register of one line; presents P symmetric tap pairs per cycle |
| `afb_coef_mem` | 513-word coefficient memory, loadable, three read ports of P consecutive words |
| `afb_mac_set` | P pre-adders + multipliers into one 40-bit accumulator; round, saturate |
| `afb_top` | analysis bank: the above, the two hand-over registers and the band output registers |
| `afb_sdelay` | enable-driven delay chain used for every alignment delay |
| `afb_align` | per-band alignment inside each rate group |
| `sfb_synth` | group sums, group delays, zero-stuffing, interpolators I_S1/I_S2, output |
| `fb_top` | analysis → alignment → synthesis |

## The schedule and the cycle budget

A MAC set with P multipliers computes a sub-filter with m stored words in ⌈m/P⌉
cycles. Each cycle does the following:

1. Lane j reads tap pair i = kbase + j from the delay line: x[i] and x[N−1−i].
   The centre tap has no partner.
2. The lane pre-adds the pair.
3. It multiplies the sum by coefficient word i.

The P products go into one accumulator.

This is the budget per line, which `afb_pkg::line_cycles` computes:

| line | rate | sub-filters | MACs | cycles needed | cycles available at 33 × fs |
|---|---|---|---|---|---|
| 1 | every sample | I_A1 I_A2 H18 H17 H16 | 3 | 6+9+5+6+7 = **33** | 33 |
| 2 | every 2nd sample | H18 H17 H16 | 1 | 15+17+20 = **52** | 66 |
| 3 | every 4th sample | H18 H17 H16 H9…H1 | 4 | 4+5+5+6·12+13+13+13 = **125** | 132 |

Line 1 is therefore fully busy, and it sets the throughput.

**Hand-over between lines.** Lines 2 and 3 are fed by a hand-over register
each, `hold2` and `hold3`:

* The I_A1 result of every even sample is captured into `hold2`.
* The I_A2 result of every fourth sample is captured into `hold3`.
* The capture happens one cycle after I_A1 or I_A2 finishes on line 1.
* As soon as the target line's sequencer is idle, or on its last cycle, the
  register is shifted in and that line starts its pass.

So the three lines run concurrently and overlap freely.

**Input stalls.** `in_ready` is low in these cases:

* while line 1 is still busy with a pass (it rises on line 1's final cycle),
* while a hand-over register is occupied.

Together these give the no-overrun rule. At one sample every 33 clocks
`in_ready` is always high when the next sample arrives. Samples offered faster
are simply stalled, not dropped.

**Band outputs.** A band result appears in `band_out[b-1]` with a one-cycle
`band_upd[b-1]` strobe, two cycles after the last MAC cycle of its sub-filter.
`band_sat[b-1]` marks a result that was clipped. Update rates:

* bands 18..16 update every sample,
* bands 15..13 every 2nd sample,
* bands 12..1 every 4th sample.

**Sample phase.** The controller's sample phase starts at 0 after reset. The
first accepted sample feeds both lower lines.

## Alignment and synthesis: making the bank linear phase

The delays differ between bands and between rate groups:

* **Within a group.** Each band's group delay is (N−1)/2 of its H filter,
  counted in that group's own sample periods.
* **Across groups.** A band in the half-rate group is also delayed by I_A1, and
  its H delay counts double.
* **In synthesis.** Each group must be interpolated back to fs, which adds the
  delay of I_S1 or I_S2.

Equalising this takes two stages.

1. **`afb_align`, per band.** Each band is delayed, in its own update periods,
   up to the longest H delay of its group.
   - The depth is `align_depth(b)` = group max (N−1)/2 − own (N−1)/2.
   - For bands 1..18 that gives 0 1 1 5 5 5 5 5 5 30 33 35 0 3 5 0 3 5, which
     is 146 registers.
   - The delays shift on the band's own update strobe, so they run at the
     band's own rate and need no clock of their own.
2. **`sfb_synth`, per group.** The three groups are brought to the same delay
   by delaying the summed group signal. That needs one delay chain per group,
   not one per band.
   - The path delays in input samples are:

     | group | path delay | total |
     |---|---|---|
     | g1, fs | H16 | 19 |
     | g2, fs/2 | I_A1 + 2·H16 + 2 + I_S1 = 17 + 38 + 2 + 17 | 74 |
     | g3, fs/4 | I_A2 + 4·H1 + 4 + I_S2 = 24 + 196 + 4 + 24 | 248 |

   - The longest path, 248 samples, is `SYN_DELAY`.
   - To equalise, g1 gets 229 samples of delay and g2 gets 87 half-rate
     samples (`GRP_DEPTH`).
   - The "+2" and "+4" arise because the synthesis bank reads the last
     *complete* group sum when it starts an output sample, which is one group
     period old.

**One synthesis output.** Band 16 is the last full-rate band. Its update
triggers one output sample:

* The current g1 goes into its delay line.
* On the matching phase, the latched g2 and g3 go into theirs. On the other
  phases, zero goes in instead, which is the upsampling by zero insertion.
* The two interpolators run in parallel on one MAC each: 18 cycles for I_S1 and
  25 for I_S2.
* `y_out` appears with a `y_valid` strobe 28 cycles after the band-16 update.

This fits inside the 33-cycle sample period, and an assertion checks that an
output never starts while the previous one is still running.

**Register count.** All alignment together takes 146 + 229 + 87 = 462 sample
registers.

## Arithmetic

| quantity | format |
|---|---|
| samples | 16-bit two's complement |
| coefficients | 16-bit Q1.15 |
| accumulator | 40 bits (no wrap for any sub-filter here) |
| sub-filter outputs | result / 2¹⁵, rounded half up, saturated to 16 bits |

* **Rounding and saturation.** The same rounding and saturation apply to the
  I_A outputs that feed lines 2 and 3, so clipping there is seen by the lower
  bands.
* **Synthesis bank.** It sums the bands of a group into a 21-bit sum and
  saturates it to 16 bits. It rounds and saturates the interpolator outputs the
  same way. The three paths are added and saturated to give `y_out`. `y_sat`
  flags any clipping on the way.
* **Interpolator gain.** An interpolator after zero insertion by L needs a
  passband gain of L. Fold that into the I_S coefficients, as far as Q1.15
  allows.
* **Unused lanes.** A MAC lane whose tap index lies past the end of the filter
  reads zero operands, so it does no toggling work. This is this design's
  stand-in for clock-gating idle multipliers.

## Interfaces

`fb_top` (all single clock domain `clk`, asynchronous active-low `rst_n`):

| port | dir | width | meaning |
|---|---|---|---|
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/16 | input samples; transfer when both valid and ready are high |
| `coef_we`, `coef_addr`, `coef_wdata` | in | 1/10/16 | analysis coefficient load, word k of filter f at `coef_base(f)+k`, k = 0 is the outermost tap |
| `syn_coef_we`, `syn_coef_addr`, `syn_coef_wdata` | in | 1/6/16 | synthesis coefficients: I_S1 words at 0..17, I_S2 at 18..42 |
| `band_out[18]`, `band_upd`, `band_sat` | out | 16 ×18 / 18 / 18 | analysis bands (index b−1 for band b; band 18 is the highest) |
| `aligned_out[18]`, `aligned_upd` | out | 16 ×18 / 18 | aligned bands; `aligned_upd` follows `band_upd` by one cycle; the place for per-band gains |
| `line_busy` | out | 3 | a delay line is in a pass |
| `y_out`, `y_valid`, `y_sat` | out | 16/1/1 | full-rate output, one strobe per input sample |
| `syn_busy` | out | 1 | synthesis bank computing |

`afb_top` has only the analysis subset of these ports.

* **Coefficient memory.** It has no reset. Load it before streaming samples.
  Rewriting it while running takes effect at once, with no glitch protection.
* **Reset.** Reset clears the delay lines, the buffers and the outputs.

## Where this departs from the published design

The structure follows the published design:

* the filter set and its band mapping,
* the three delay lines at fs, fs/2 and fs/4,
* the 3/1/4 MAC allocation,
* the 33/52/125-cycle schedule at 792 kHz,
* the 187 delay-line registers,
* the controller / register module / filter engine split.

The departures and gaps are these:

* **Filter coefficients and tap lengths are not published.** The tap lengths
  above were chosen to hit the published cycle counts and delay-line size
  exactly.
  - They need 513 stored coefficients where the published figure is 506. No
    odd tap lengths meet both 506 words and the 125-cycle count for line 3.
  - The coefficients themselves are loaded at run time, so any quasi-ANSI
    design with these lengths can be used.
* **The published figure of 226 MACs per sample differs.** This design performs
  about 238.5 useful multiplications per input sample:
  - 95 per sample on line 1,
  - 52 per 2 samples on line 2,
  - 470 per 4 samples on line 3.

  The multipliers have 4·125 = 500 lane-cycles per 4 samples on line 3, so a
  few lanes sit idle in each pass.
* **Linear-phase buffers.** The published figure is 300 buffer registers, but
  their placement is not described. The placement here (per band plus per group
  sum) needs 462 with these tap lengths.
* **The synthesis bank is taken from the block diagram only:**
  - group sums,
  - ↑2 with I_S1 and ↑4 with I_S2,
  - a final adder.

  The interpolator lengths (35 and 49, equal to I_A1 and I_A2), its timing and
  its datapath are this design's own.
* **Left out:**
  - the sub-band amplification and WDRC stage,
  - prescription fitting,
  - the microphone/ADC and receiver/DAC.
* **Idle multipliers.** Clock gating of idle multipliers is represented only by
  zero operands. No gated clocks are used.
* **Interfaces of this design's own:** word widths, rounding, the valid/ready
  handshake, the hand-over registers and the coefficient load port.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. The two system-level
testbenches:

* **`tb_afb_top`.** Loads random coefficients, with H18's at full scale so that
  saturation occurs. It then streams 6000 random samples in real time (250 ms of
  24 kHz audio), followed by a back-to-back burst. Every band update is compared
  with a direct-form FIR model that uses the full, unfolded tap vectors. It also
  checks:
  - busy cycles per pass (33/52/125),
  - the update count of every band,
  - no stall in real-time operation.

  It counts each mechanism: stalls, both hand-overs, saturation, and samples
  accepted on line 1's final cycle.
* **`tb_fb_top`.** Runs the whole chain at default parameters. It adds a model of
  the alignment and synthesis, and checks every `y_out` and its latency.

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_fb_top \
    rtl/afb_pkg.sv $(ls rtl/*.sv | grep -v afb_pkg) tb/tb_fb_top.sv
./obj_dir/Vtb_fb_top
```

Replace `tb_fb_top` with any other testbench name. `afb_pkg.sv` must come first.
The unit testbenches for the delay line, MAC set and coefficient memory use
small parameter sets. The rest run at the defaults.

## Changing the design

* **Tap lengths.** Edit `TAPS` in `afb_pkg`, and `LINE_LEN` if a line's longest
  filter changes. The memory map, the schedule lengths, the alignment depths and
  `SYN_DELAY` follow automatically. Check the real-time budget with
  `line_cycles(line, P)`: it must stay ≤ 33, 66 and 132 for the three lines.
  The testbenches re-derive their models from the same package, except for the
  depth list written out in `tb_afb_align`.
* **MAC counts.** Set these through `MACS1`, `MACS2` and `MACS3` on `afb_top`.
* **Synthesis interpolators.** Their lengths are `IS_TAPS`.
