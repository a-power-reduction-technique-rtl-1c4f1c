# Low-power LFSR test pattern generator with gated flip-flops and bit interchange

Built-in self test usually feeds a circuit under test from a linear feedback
shift register (LFSR). Its pseudo-random patterns give good fault coverage, but
consecutive patterns are uncorrelated, so the generator itself and the scan
chain it fills toggle a lot. This generator cuts that switching in two
independent places:

1. **Inside the LFSR.** Every flip-flop has its own clock gate. A flip-flop gets
   a clock edge only when its next value differs from its present value; a
   flip-flop that would merely reload what it holds is not clocked at all.
   The state sequence is unchanged.
2. **At the output.** A row of two-input multiplexers, selected by the last
   LFSR bit, swaps neighbouring bit pairs (1↔2, 3↔4, …) of the pattern. The
   mapping is one-to-one, so the same 2^n−1 patterns still appear, which keeps
   fault coverage. But they appear in a different order, and consecutive
   patterns differ in fewer bits (lower total Hamming distance, THD).

The RTL is parameterised by the width `N` (default 8) and is written in
synthesizable SystemVerilog-2017.

## Block structure

```
            mtpg_top  (N = 8)
 ┌───────────────────────────────────────────────────────────┐
 │ mclk_lfsr                                                 │
 │  d = load ? seed : en ? {q[N-2:0], ^(q & TAPS)} : q        │
 │  ┌──────────────┐ ┌──────────────┐       ┌──────────────┐ │
 │  │switching_unit│ │switching_unit│  ...  │switching_unit│ │
 │  │ cl_clock_gate│ │ cl_clock_gate│       │ cl_clock_gate│ │
 │  │   + D flop   │ │   + D flop   │       │   + D flop   │ │
 │  └──────┬───────┘ └──────┬───────┘       └──────┬───────┘ │
 │        FF1              FF2                    FF(n) ─────┼──► serial_out
 │         └────────────────┴─────────┬─────────────┘        │
 │                              bit_interchange  (sel = FF(n))│──► tv[N-1:0]
 └───────────────────────────────────────────────────────────┘
```

| Module            | Role |
|-------------------|------|
| `mlfsr_pkg`       | `max_taps(n)`: maximal-length tap masks for n = 2..16 |
| `cl_clock_gate`   | per-flip-flop control logic: gated clock = clk while `data_in != data_out` |
| `switching_unit`  | one LFSR stage: D flip-flop clocked by its own `cl_clock_gate` |
| `mclk_lfsr`       | N switching units wired as an external-XOR (Fibonacci) LFSR, with seed load and enable |
| `bit_interchange` | multiplexer row that swaps bit pairs when bit N equals `SWAP_ON` |
| `mtpg_top`        | the generator: `mclk_lfsr` followed by `bit_interchange` |

Bit numbering used throughout: index 0 is stage/bit 1 (FF1), index N−1 is
stage/bit n (FF(n)). Written as a pattern, bit 1 is printed first.

## The data-driven clock gate (the subtle part)

The gate's specification is a truth table. With the clock high, the modified
clock is 1 when `data_in` and `data_out` differ and 0 when they are equal.
With the clock low it is 0.

The obvious realisation, `gclk = clk & (d ^ q)`, does not work in a shift
register. After a rising edge the flip-flop's own `q` changes, and so does its
`d`, which is the upstream neighbour's `q`. Both happen while `clk` is still
high. `d ^ q` can go from 0 to 1 inside the high phase and produce a second
rising edge on `gclk`, clocking the stage twice in one cycle. In a Fibonacci
LFSR this happens often, for example whenever a run of equal bits ends.

`cl_clock_gate` therefore uses the standard latch-based clock-gating cell:

```
differ      = data_in ^ data_out
en_latched  = differ        while clk == 0   (latch transparent on low phase)
gclk        = clk & en_latched
```

The enable is sampled while the clock is low and frozen while it is high. So
`gclk` is a clean copy of one whole clock-high pulse, or stays 0. The latch is
deliberate: synthesis reports one latch bit per stage, 8 in the default build.
For implementation, replace the latch and AND gate with the target library's
integrated clock-gating cell. Then treat each `gclk` as a gated clock in timing
analysis: setup of `differ` to the latch closing, and skew between the clock
branches. The functional requirement is ordinary: `d` and `q` must settle
before the rising edge of `clk`.

Consequences worth knowing:

* **Edges delivered equal bit changes.** A stage is clocked exactly in the
  cycles where its value changes. Over one full 8-bit period (255 clocks) the
  eight flip-flops receive 1024 clock edges instead of 2040, about 50% fewer.
  This count is the simulation's proxy for the clock-power saving. Real power
  also includes the gates, the latches and the clock tree, so the saving in
  milliwatts is much smaller. A published FPGA measurement of this scheme
  reported roughly 8% less total power (33.59 mW against 30.89 mW).
* **Hold costs nothing.** With `en` low, `d == q` everywhere and no flip-flop
  is clocked.
* **Reset bypasses the gate.** `rst_n` is an asynchronous, active-low reset
  applied straight to the flip-flops. During reset the gate may still pulse;
  that is harmless.

## The LFSR

`mclk_lfsr` is an external-XOR shift register. Each enabled clock does:

```
stage 1     <= XOR of the stages selected by TAPS
stage k+1   <= stage k
```

This form and shift direction reproduce the reference 3-bit sequence exactly
(stage1 ← stage2 ⊕ stage3, from 011):

```
011 → 001 → 100 → 010 → 101 → 110 → 111 → 011 …
```

`TAPS` defaults to `mlfsr_pkg::max_taps(N)`, a standard maximal-length table:

| N | polynomial | N | polynomial |
|---|-----------|---|-----------|
| 3 | x³+x²+1 | 10 | x¹⁰+x⁷+1 |
| 4 | x⁴+x³+1 | 11 | x¹¹+x⁹+1 |
| 5 | x⁵+x³+1 | 12 | x¹²+x⁶+x⁴+x+1 |
| 6 | x⁶+x⁵+1 | 13 | x¹³+x⁴+x³+x+1 |
| 7 | x⁷+x⁶+1 | 14 | x¹⁴+x⁵+x³+x+1 |
| 8 | x⁸+x⁶+x⁵+x⁴+1 | 15 | x¹⁵+x¹⁴+1 |
| 9 | x⁹+x⁵+1 | 16 | x¹⁶+x¹⁵+x¹³+x⁴+1 |

Every entry was checked for period 2^N−1 under this shift convention. For other
widths, pass `TAPS` explicitly; bit k−1 of the mask is stage k, and it must
include stage N. The gate does not depend on the taps: any tap set works
unchanged.

Control: `load` (highest priority) copies `seed` on the next clock. `en`
advances one state per clock. With neither, the register holds. `rst_n` loads
the parameter `SEED` (default 0…01). The all-zero state locks up as in any XOR
LFSR, so do not load it.

## The bit interchanger

`bit_interchange` has a selection line `sel = (bit n == SWAP_ON)`.

* When `sel` is 1, it exchanges bit 1↔2, 3↔4, and so on. For odd N the pairs
  run up to (N−2, N−1). For even N they stop at (N−3, N−2), so bits N−1 and N
  always pass through. That is `floor((N−1)/2)` pairs in both cases.
* When `sel` is 0, every bit passes unchanged.
* Bit n itself is never moved. The swap is therefore its own inverse, and the
  2^N−1 non-zero patterns map one-to-one onto themselves.

`SWAP_ON = 1` (the default) reproduces the reference example below;
`SWAP_ON = 0` is the other polarity.

| vector | raw LFSR | reordered |
|--------|----------|-----------|
| V1 | 011 | 101 |
| V2 | 001 | 001 |
| V3 | 100 | 100 |
| V4 | 010 | 010 |
| V5 | 101 | 011 |
| V6 | 110 | 110 |
| V7 | 111 | 111 |
| THD | 11 | 9 |

The reordered stream contains the same seven patterns. Read as a reordering of
the raw set, it is V5, V2, V3, V4, V1, V6, V7.

## Measured behaviour

The table shows full periods from seed 0…01, or from 011 for N = 3, with the
default taps. THD is summed over the 2^N−2 consecutive pairs. "Weighted
transitions" is the average over all vectors of
Σ_{i=1}^{N−1} (N−i)·(t_i ⊕ t_{i+1}), with bit 1 scanned in first. This is the
usual scan-in power estimate.

| N | vectors | THD raw | THD reordered | reduction | avg weighted transitions |
|---|---------|---------|---------------|-----------|--------------------------|
| 3 | 7 | 11 | 9 | 18.2% | 1.7143 |
| 4 | 15 | 30 | 26 | 13.3% | 3.2000 |
| 8 | 255 | 1022 | 830 | 18.8% | 14.0549 |
| 12 | 4095 | 24574 | 19454 | 20.8% | 33.0081 |
| 16 | 65535 | 524286 | 409598 | 21.9% | 60.0009 |

Two points for anyone comparing with published numbers for this technique:

* **THD reductions.** The published table reports larger THD reductions for
  4, 8 and 16 bits (22.6%, 47.6%, 27.1%) and a THD increase for 12 bits. The
  polynomials, seeds and vector counts behind those figures are not known.
  With the maximal-length polynomials above, and with all seeds, both swap
  polarities and several pair rules tried for 4 and 8 bits, those values were
  not reproduced. The reductions above are what this RTL produces.
* **Weighted-transition average.** Over a full period this average is the
  same before and after reordering. The metric sums over individual vectors,
  and the interchanger maps the full vector set onto itself. The raw values do
  agree with published conventional-LFSR figures (3.20, 13.67, 31.08, 60.14
  for 4, 8, 12, 16 bits). Only the THD between consecutive vectors benefits
  from the reordering.
* **Worked example.** The 3-bit example is sometimes quoted with a raw THD of
  10. Its seven vectors give Hamming distances 1, 2, 2, 3, 2, 1, which sum to
  11.

## Top-level interface (`mtpg_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset (LFSR ← 0…01) |
| `en` | in | 1 | produce the next pattern on each clock |
| `load` | in | 1 | load `seed` on the next clock (priority over `en`) |
| `seed` | in | N | seed, bit 0 = FF1, non-zero |
| `tv` | out | N | reordered test vector (combinational from the flip-flops) |
| `lfsr_q` | out | N | raw LFSR state |
| `serial_out` | out | 1 | FF(n), the last stage |

Parameters: `N` (default 8) and `SWAP_ON` (default 1).

Timing: a new `tv` is valid after each enabled rising edge, one pattern per
clock. A complete test set takes 2^N−1 enabled clocks, after which the LFSR is
back at its seed. The generator drives parallel patterns. Shifting them into
the circuit under test's scan chain, and the circuit itself, are outside this
RTL.

## Simulation

Every testbench checks itself, ends with a line
`TB_RESULT checks=<n> failures=<m>`, and has a watchdog. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/mlfsr_pkg.sv tb/tb_mtpg_top.sv --top-module tb_mtpg_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|-----------|----------------|
| `tb_cl_clock_gate` | all four truth-table rows; no glitch when data change during the high phase; idle gate stays closed |
| `tb_switching_unit` | `q` follows `d` like a plain flip-flop; gated pulses equal value changes; asynchronous reset |
| `tb_mclk_lfsr` | 8-bit and 3-bit runs against a reference model; period; 3-bit sequence; clock edges per stage equal value changes; hold gives no edges; reload |
| `tb_bit_interchange` | exhaustive for N = 3, 4, 7, 8 and the opposite polarity, against hand-written bit arrangements |
| `tb_mtpg_top` | default 8-bit generator, one full test set: every vector, uniqueness, 255-clock period, THD 1022 → 830, clock-edge count, hold, reload; each mechanism must occur |
| `tb_workloads` (with helper `tpg_workload_run`) | full periods at N = 3, 4, 8, 12, 16 and the table above |

All of them finish in well under a second.

## Where the design makes its own choices

These points are not fixed by the technique and were chosen here:

* **Clock gate.** A latch-based gate, as explained above. A bare combinational
  gate is not glitch-free in this structure.
* **LFSR.** External-XOR form, chosen because it reproduces the reference
  3-bit sequence. The tap table is a standard maximal-length table.
* **Control ports.** Seed load, enable, asynchronous reset and the reset seed
  0…01 are additions. The generator's input is taken to be a seed-load path.
* **Swap polarity.** Swapping when bit n is 1 follows the worked example. The
  other polarity is available as `SWAP_ON = 0`.
* **Width limits.** Widths of 2 to 16 have built-in taps. Any other width
  needs an explicit `TAPS`; without one, an elaboration-time assertion fires.
