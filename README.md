# Sampling offset flash TDC: 64 levels with calibration by added timing noise

A flash time-to-digital converter (TDC) measures where a data edge falls relative
to a reference edge. It compares the two edges in many flip-flops or arbiters
at once. A classic flash TDC staggers the comparisons with a chain of delay
buffers, so its resolution is one buffer delay (or, for a Vernier line, a
difference of two delays). The *sampling offset* TDC drops the buffers. Every
level compares the **same** two edges, and its threshold is simply the random
timing offset `t_os` that transistor mismatch gives its arbiter. These offsets
are a few picoseconds apart, so the converter resolves a few picoseconds with
nothing but one arbiter, three flip-flops and a counter per level.

The price is that nobody knows the thresholds until they are measured. Measuring
them directly needs a generator that can place an edge with picosecond accuracy.
The scheme modelled here avoids that. It adds Gaussian timing noise of known
size (about 30 ps rms) to the data edge and steps the nominal edge in coarse
20 ps steps. This turns each level's hard 0/1 decision into a smooth Gaussian
curve whose centre is `-t_os`. The centre can be found far more precisely than
the step size.

This repository holds:

- SystemVerilog for the 64-level converter, with its readout;
- a behavioural model of the analog arbiter;
- the single-level prototype, built from plain flip-flops and a binary counter;
- testbenches that run the calibration and jitter measurements at full size.

## Structure

```
sotdc_top
├── sotdc_section  (x2, SECTION_ID 0 and 1: levels 0..31 and 32..63)
│   └── sotdc_level  (x32)
│       ├── sotdc_arbiter   behavioural model of the analog arbiter
│       ├── sync_chain      3 flip-flops on phi_ff
│       └── lfsr_counter    20-bit two-tap LFSR, enabled by the last flip-flop
├── sotdc_readout  addressed, registered read port for the 64 counters
└── cpld_level     the single-level prototype, with its own pins
    ├── sync_chain      3 flip-flops on phi_clock (the first one measures)
    └── binary_counter  20-bit up counter
```

`sotdc_pkg` holds the sizes (64 levels, 2 sections, 20-bit counters, 3
synchronizer stages), the LFSR taps and seed, the arbiter noise, and the
function that gives each modelled level its offset.

## One converter level

```
phi_data ─┐
          ├─ arbiter ─ q ─ FF ─ FF ─ FF ─ en ─ 20-bit LFSR ─ count_out
phi_ref  ─┘              └──────┴────┴───────────┘
                             all clocked by phi_ff
```

**Arbiter** (`sotdc_arbiter`). This is a cross-coupled latch. Its two discharge
paths are gated by `phi_1 = phi_data` and `phi_2 = phi_ref`. Let
`dT = t(phi_ref) - t(phi_data)`, which is positive when data comes first. The
model decides

    q = 1  when  dT + T_OS_PS + noise > 0,   noise ~ N(0, SIGMA_PS)

so `P(q = 1) = Phi((dT + t_os) / sigma)`. The decision appears 100 ps after the
later of the two rising edges, on `q` and its complement `q_n`. The arbiter does
not hold its decision for the whole reference period. When an input falls, the
latch precharges and both outputs return to 0. The model contains `real`
arithmetic, `$realtime`, `$urandom` and delays, so it is for simulation only.
The noise is the sum of 12 uniform variates minus 6.

**phi_FF.** Because the decision is short-lived, the flip-flops and counter are
not clocked by `phi_ref`. They use a separate phase, `phi_ff`, at the same
frequency. Its rising edge must come after both data and reference edges
(allow for the noise and the 100 ps decision time), and while both are still
high. `sotdc_level` asserts that `phi_ref` is high at every rising `phi_ff`
edge. The testbenches run at 25 MHz and raise `phi_ff` 6 ns after `phi_ref`,
then drop all inputs 12 ns later. Clocking the flip-flops from a buffered
`phi_ref` would also work. It would, however, load `phi_ref` more than
`phi_data` and skew the comparison.

**Synchronizer** (`sync_chain`, `STAGES = 3`). The arbiter output can be
metastable when the edges nearly coincide. Two extra flip-flops give it two more
periods to settle before it can enable the counter.

**Latency.** A decision sampled at `phi_ff` edge k is counted at edge k+3. After
a run of N measurement cycles, three more `phi_ff` edges are needed before the
counters are final. The testbenches supply them as three cycles with a
clearly late data edge, which count nothing.

## The LFSR counter and how to decode it

Each level counts with a 20-bit Fibonacci LFSR (`lfsr_counter`) rather than a
binary counter. An LFSR needs fewer gates and less routing, and its critical
path is one XOR. On each enabled edge:

    state <= {state[18:0], state[19] ^ state[16]}        // x^20 + x^17 + 1

The polynomial is primitive, so starting from the reset seed `20'h00001` the
state visits all 2^20 - 1 non-zero values before repeating. One run can
therefore count up to 1,048,574 events without ambiguity. The read-out value is
the raw state. The event count n is its position in the sequence from the
seed. To decode it off line, step a software copy of the LFSR from the seed
until it matches (this is `lfsr_decode` in `tb/tb_sotdc_pkg.sv`). For large
numbers of readings, use a 2^20-entry lookup table. The tap pair and the seed
are this design's choice. Any other maximal-length two-tap pair only changes
the decoding.

## Reading the counters

`sotdc_readout` is a 64-to-1 multiplexer followed by a 20-bit register on
`rd_clk`. Drive `rd_addr = a` and take `rd_count` after the next rising `rd_clk`
edge. The register keeps the pins stable even if the selected counter is still
running. Read after the flush cycles and before the next reset. `rst_n`
(asynchronous, active low) loads every LFSR with the seed, which is a count of
0. It also clears the synchronizers and the readout register. The original
chip had circuitry to move the counts off chip, but its design is not known.
This multiplexer is a stand-in, and a serial scan chain would serve equally
well.

## Calibration with added noise

For every level, calibration finds `t_os`. All 64 levels are calibrated at
once:

1. Choose M nominal leads `dT_j` that cover the threshold range with margin. The
   model uses -100 ps to +100 ps in 20 ps steps (M = 11).
2. For each `dT_j`, reset and run N reference cycles. In every cycle, the data
   edge is moved by an independent Gaussian amount of standard deviation
   `sigma_added` (29.8 ps). Flush, then read all 64 counters:
   `p_i(dT_j) = n_i / N`.
3. For each level, `p_i(dT)` samples the Gaussian cdf `Phi((dT + t_os) / s)`,
   with `s = sqrt(sigma_added^2 + sigma_arbiter^2)`, which is close to
   `sigma_added`. Its centre is `-t_os`. The centre can be found by fitting a
   Gaussian cdf, or, as the testbench does, from moments:
   `-t_os = dT_max - integral(p dT)`, integrated by the trapezoid rule.
   The width comes out as well (second moment, less `step^2 / 12`). It should
   match `sigma_added`, which is a check on the noise source.

The run time is `M * N / f`. At M = 21, N = 10^5 and f = 25 MHz this is 84 ms.
The accuracy improves with N. The noise only has to be Gaussian with a stable
rms. Its linearity matters: a non-Gaussian noise shape biases the centre.

Traditional **direct calibration** is the same procedure without added noise.
It needs 1 ps steps, because each level switches from 0 to N within a fraction
of a picosecond.

## Jitter measurement

Once the offsets are known, one run of N cycles with a jittery data edge gives,
for each level, `p_i = P(dT > -t_os_i)`. For Gaussian jitter with mean `mu` and
rms `sigma`:

    Phi^-1(p_i) = (mu + t_os_i) / sigma

This is a straight line in `t_os_i`. A line fit gives `1/sigma` as the slope and
`mu/sigma` as the intercept. A measurement takes `N / f`, so 10^5 samples at
25 MHz take 4 ms. The useful range is limited by how far apart the offsets
are spread. The model spreads them over +3 ps to +16 ps, so the converter sees
13 ps of dynamic range around an edge that is 3 to 16 ps late. Jitter whose
distribution barely overlaps that window cannot be characterized. For the same
reason the peak-to-peak jitter cannot be measured, only the Gaussian
parameters.

## The single-level prototype

`cpld_level` is the earlier one-level version, built in programmable logic. The
first of three flip-flops on `phi_clock` samples `phi_data`, so the flip-flop
itself is the time comparator. Its offset comes from the silicon and is not
visible in RTL, where the flip-flop is ideal. The other two flip-flops
synchronize the sample. A 20-bit binary counter on `phi_clock` counts while the
third flip-flop is high. Its maximum, 2^20 - 1 = 1,048,575, is exactly the
run length that suits it. In `sotdc_top` it has its own pins (`cpld_*`) and
shares nothing with the converter.

## Modelled offsets

Real offsets are random. Here level `idx` (0..63) gets

    t_os(idx) = 3 ps + 13 ps * ((idx * 37 + 11) mod 64) / 63

This is an evenly spaced grid over +3 ps to +16 ps, visited in scrambled order,
so that each section covers the whole range. To model a different chip, change
`level_offset_ps` in `sotdc_pkg`. You can also give `sotdc_level` any
`T_OS_PS` directly. All offsets on one side of zero means the converter only
detects data edges that arrive late relative to the reference. Offsets
centred on zero would be better.

## Where this RTL departs from, or adds to, its source

Taken from the source design:

- 64 levels in two sections of 32;
- per level: the arbiter, three flip-flops on a separate phase `phi_FF`, and a
  20-bit two-tap maximal-length LFSR enabled by the third flip-flop;
- the prototype's three flip-flops and 20-bit counter;
- the calibration and jitter procedures and their sizes (M, N, 25 MHz,
  29.8 ps noise).

This design's own choices:

- the LFSR taps (20,17) and the seed 1;
- every reset. The source describes none, and all are asynchronous and active
  low;
- the readout circuit;
- the arbiter model's details: the 100 ps decision time, deciding only once
  both inputs are high, releasing when an input falls, and the noise
  generator;
- the grid of modelled offsets;
- level and section numbering;
- wrap-around of the prototype counter;
- the clock phases used in the testbenches.

Not included:

- the on-chip voltage-controlled delay buffers, proposed for generating the
  calibration noise on chip. They are analog and were never built; the
  testbenches add the noise in the stimulus instead.
- the external instruments and the curve fitting, which are off-chip.

The converter's digital part (flip-flops, LFSRs, readout) synthesizes. Any
module that contains `sotdc_arbiter` (`sotdc_level`, `sotdc_section`,
`sotdc_top`) simulates but does not synthesize as a whole. In silicon the
arbiter is a hand-drawn analog cell.

## Simulation

All files use `timescale 1ps/1fs`. Compile the packages first. For example,
the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_sotdc_top \
    rtl/sotdc_pkg.sv tb/tb_sotdc_pkg.sv rtl/sotdc_arbiter.sv rtl/sync_chain.sv \
    rtl/lfsr_counter.sv rtl/binary_counter.sv rtl/sotdc_level.sv \
    rtl/sotdc_section.sv rtl/sotdc_readout.sv rtl/cpld_level.sv rtl/sotdc_top.sv \
    tb/tb_sotdc_top.sv
./obj_dir/Vtb_sotdc_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_lfsr_counter` | sequence against an independent model, enable hold, full period of 2^20 - 1 with no repeats |
| `tb_binary_counter` | counting under random enable, wrap, reset |
| `tb_sync_chain` | exact 3-edge delay, reset of all stages |
| `tb_sotdc_arbiter` | decision rule around the offset, release, resolve delay, 50 % / 84 % statistics with 30 ps noise |
| `tb_sotdc_level` | 3-edge latency, ±2 ps around the threshold, random placements |
| `tb_sotdc_section` | a section as a thermometer quantizer (arbiter noise lowered to 0.02 ps so that 0.1 ps margins hold) |
| `tb_sotdc_readout` | every address, register behaviour |
| `tb_cpld_level` | prototype latency and counts |
| `tb_sotdc_top` | full size: reset, latency through the read port, a threshold sweep over all 64 levels, reset mid-run, prototype; counts that each mechanism occurred |
| `tb_sotdc_calibration` | full size: added-noise calibration (M = 11, N = 10^5) and a jitter measurement (N = 10^5, mean 9.4 ps, rms 13.5 ps); about 30 s |
| `tb_sotdc_direct_calibration` | full size: direct calibration in 1 ps steps, N = 10^4 |

In a typical run of `tb_sotdc_calibration`, all 64 offsets are recovered to
within 0.1 ps and the noise width to within 0.5 ps. The applied jitter is
recovered to within 0.1 ps in mean and rms. The testbench's pass limits are
0.5 ps for offsets, jitter mean and rms, and 1 ps for the noise width. These numbers describe the model, which has ideal
Gaussian noise and a perfectly linear delay. On silicon, the noise source's
non-linearity and board noise dominate the error.
