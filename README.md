# Table-seeded, block-iterative square root

This is a fixed-point square root unit for FPGAs that trades one small
look-up table and a handful of hardware multipliers for most of the
iterations of a classic bit-serial square root. Instead of finding one root
bit per step, it

1. reads the top bits of the root straight out of a table indexed by the
   radicand's most significant bits, and then
2. finds the remaining root bits `BLOCK_BITS` at a time: it tries every
   possible value of the next block in parallel, squares each trial root,
   and keeps the largest one whose square does not exceed the radicand.

It also stops as soon as a trial root squares to the radicand exactly, so
radicands with "short" roots finish early.

The unit computes `root = floor(sqrt(x))` and `remainder = x - root^2` for an
unsigned `IN_WIDTH`-bit radicand. Fixed point works unchanged: if `x` has an
even number `F` of fraction bits, `root` has `F/2` (for example `x = 0xE1`
with `F = 4` is 14.0625, and the unit returns `root = 0xF`, 3.75 with two
fraction bits).

## The algorithm

Let `N = IN_WIDTH/2` be the root width, `M = ROM_BITS` and `P = BLOCK_BITS`.

**Seed.** The table holds `floor(sqrt(i))` for every `M`-bit index `i`. Indexed
by `x[IN_WIDTH-1 -: M]`, it yields the top `M/2` root bits. This is exact,
not an approximation that needs correcting, because
`floor(sqrt(floor(x / 4^k))) = floor(floor(sqrt(x)) / 2^k)`.

**Refinement.** With the root known down to bit `pos + P`, the next block is
bits `[pos+P-1 : pos]`. For each `j` in `0 .. 2^P-1` the candidate
`Q'_j = Q | (j << pos)` is formed and `R_j = x - Q'_j^2` computed. Candidates
grow with `j`, so the remainders shrink and eventually go negative. The
wanted block is the `j` with the smallest **non-negative** remainder. A
candidate with a negative remainder is too large, and since later blocks only
add bits it could never be repaired, so negative remainders always lose the
comparison. `pos` starts at `N - M/2 - P` and falls by `P` per iteration, so
a full result takes

    ITERS = (N - M/2) / P   iterations.

**Early stop.** If the winning remainder is zero, the current root is exact
and all remaining bits are zero: the unit finishes immediately. A perfect
square `s^2` stops after the first iteration whose `pos` is not above the
number of trailing zero bits of `s`. Example: 14.0625 held with 24 fraction
bits in a 32-bit word (`x = 0x0E10_0000`) has root `0x3C00`, ten trailing
zeros, and finishes after one iteration instead of six.

## Hardware structure

```
          x ──► x_reg ──┬──────────────────────────────┐
                        │ top M bits                   │
                        ▼                              ▼
                   sqrt_rom ──► M/2-bit seed   sqrt_iter_block
                                  │  base ──►  2^P candidates ─► 2^P squarers ─► x - sq
                     q_reg ◄──────┘                                    │
                       ▲                                               ▼
                       └──── cand[min_idx] ◄──── sqrt_cmp_tree (P levels, min non-negative)
                                     sqrt_ctrl: pos, launch, early stop, done
```

| Module            | Role |
|-------------------|------|
| `sqrt_module`     | top: radicand register, root/remainder registers, wiring |
| `sqrt_rom`        | `2^M x M/2` seed table, contents computed at elaboration, registered read |
| `sqrt_iter_block` | candidates, `2^P` multipliers, subtractors with sign flag; 4-stage pipeline |
| `sqrt_cmp_tree`   | `P`-level registered tree, returns index and value of the minimum non-negative remainder |
| `sqrt_ctrl`       | IDLE / ROM / RUN sequencer, block position, early stop, iteration count |
| `sqrt_pkg`        | integer square root used to fill the table, latency functions, state type |

With the default 2-bit blocks there are four candidates and therefore four
multipliers of `N x N` bits, which map onto DSP slices.

## Timing

Every stage is registered; the cycle budget is

| cycle(s) after start | action |
|---|---|
| 0 | `start` accepted while `ready`; `x` registered |
| 1 | table read of the seed |
| per iteration: 1 | candidates registered |
| 2, 3 | multiplier input and output stages |
| 4 | remainders and sign flags registered |
| 5 .. 4+P | one comparison-tree level per cycle |
| 5+P | root register loaded with the winner; stop or launch the next block |

so a result that used `k` iterations appears `1 + k*(5+P)` cycles after the
accepted start, `1 + 7k` with 2-bit blocks. Only one radicand is in flight at
a time: the unit is iterative, not a throughput pipeline.

Full-resolution cycle counts with 2-bit blocks (all checked in simulation and
equal to the figures reported for the original FPGA implementation):

| radicand | 4-bit table | 8-bit table | 12-bit table |
|---------:|------------:|------------:|-------------:|
| 16 bits  | 22 | 15 | 8  |
| 32 bits  | 50 | **43** (default) | 36 |
| 48 bits  | 78 | 71 | 64 |
| 64 bits  | 106 | 99 (not published) | 92 |

A larger table removes iterations at the cost of `2^M` table words; larger
blocks remove iterations at the cost of `2^P` multipliers and a deeper tree.
The 64-bit / 16-bit table / 4-bit block size resolves the root in six
iterations (`1 + 9*6 = 55` cycles) and is also exercised.

## Interface

```
sqrt_module #(IN_WIDTH = 32, ROM_BITS = 8, BLOCK_BITS = 2)
  input  clk, rst_n                 synchronous, active-low reset
  input  start, x[IN_WIDTH-1:0]     request; accepted only while ready
  output ready                      idle
  output done                       one-cycle pulse, results valid
  output root[N-1:0], remainder[N:0], exact, iterations
```

`x` is captured at the accepted edge and may change afterwards; a `start`
while busy is ignored. The outputs hold until the next result.
`iterations` reports how many refinement iterations were used
(fewer than `ITERS` means an early stop).

Parameter rules, checked at elaboration: `ROM_BITS` even and below
`IN_WIDTH`, and `N - ROM_BITS/2` a multiple of `BLOCK_BITS`.

## Where this design makes its own choices

The structure (seed table, parallel candidates, squarers, comparison tree,
stop on exact root) and the cycle counts above are the source design's.
The following are choices of this implementation:

- **Comparison rule.** "Minimal remainder" is implemented as minimal
  non-negative remainder, carried with an explicit sign bit; a plain signed
  minimum would give wrong roots.
- **Pipeline.** The split into table read, candidate register, two
  multiplier stages, subtract, one cycle per tree level and an update cycle
  was chosen to reproduce the published 7-cycle-per-iteration rate; the
  original implementation's actual stage boundaries are not known.
- **Exact stop loads the root.** On a zero remainder the winning candidate is
  written to the root register before finishing.
- **Table contents** are computed by a constant function at elaboration, so
  any `ROM_BITS` works without a data file; on an FPGA the table infers a
  block or distributed ROM.
- **Handshake, reset, remainder/exact/iterations outputs** are additions.
- **No reduced-precision mode.** Apart from the exact-root stop, every
  result runs to the root's LSB. Stopping an iteration or two early for a
  bounded error is possible in principle, but there is no control for it.
- Maximum clock frequency and area figures of the original FPGA
  implementation are not reproduced or checked.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
The reference model (`tb/sqrt_ref_pkg.sv`) is a restoring digit-by-digit
square root on 128-bit values that uses no multiplier or table.

| testbench | what it checks |
|---|---|
| `tb_sqrt_module` | default size end to end: zero, max, worked example, perfect squares stopping after each iteration 1..5, exact roots at the last iteration, 300 random values, start while busy, back-to-back runs; root, remainder, exact, iteration count and latency `1 + 7k` |
| `tb_sqrt_configs` | all twelve sizes above, each against its published full-resolution cycle count |
| `tb_sqrt_rom` | every entry of the 8- and 12-bit tables, one-cycle read, hold with enable low |
| `tb_sqrt_iter_block` | candidates, remainders, sign flags and 4-cycle latency, 2- and 3-bit blocks |
| `tb_sqrt_cmp_tree` | winner index/value with negatives, ties and all-negative sets; 2- and 3-level trees, one set per cycle |
| `tb_sqrt_ctrl` | sequencing against a model datapath: handshake, block positions, early stop at each iteration, latency |

Concurrent assertions check that the winning remainder is never negative,
that `done` is a single-cycle pulse and that the tree only reports while an
iteration is in flight.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/sqrt_pkg.sv tb/sqrt_ref_pkg.sv tb/tb_sqrt_module.sv \
    --top-module tb_sqrt_module -o sim
./obj_dir/sim
```

Replace `tb_sqrt_module` with any testbench above. Each runs in well under a
second. To try another size, override the parameters of `sqrt_module`, as
`tb/tb_sqrt_cfg_check.sv` does.
