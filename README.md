# Iterative logarithmic multiplier

An unsigned integer multiplier that trades accuracy for speed and area, with
the accuracy selectable at build time. It needs no partial-product array: every
step is a leading-one detection, two shifts and a few additions. Each extra
step, an *error-correction circuit* (ECC), cuts the worst-case error by at
least a factor of four. Enough steps give the exact product.

The default build takes 16-bit operands, uses two correction circuits, is
pipelined with a latency of 6 cycles, and accepts one operand pair per cycle.
Its relative error is below 1.5625 % in the worst case and about 0.107 % on
average.

## The arithmetic

Write each operand as its leading one plus a residue:

    N = 2^k + r,     k = position of the highest '1',  r = N - 2^k  (N with that bit cleared)

Then, exactly,

    N1 * N2 = 2^(k1+k2) + r1 * 2^k2 + r2 * 2^k1  +  r1 * r2
              \__________ P(0): shifts and adds _/   \ error E(0) /

The **basic block** computes P(0). The dropped term r1*r2 is itself a product
of two smaller numbers. A second basic block, fed r1 and r2, approximates it
as C(1) and hands on its own residues. This is repeated for each correction
circuit:

    P(i) = P(0) + C(1) + ... + C(i)

Properties that follow, and that the testbenches check:

* The result never exceeds the true product. The error after i corrections is
  exactly the product of the residues left after i+1 leading ones have been
  cleared from each operand.
* The worst-case relative error is below 25 % / 4^i: 25, 6.25, 1.56, 0.39,
  0.098 and 0.024 % for 0 to 5 corrections.
* Once either residue is zero, the result is exact. So i+1 basic blocks give
  the exact product whenever one operand has at most i+1 bits set.
* A zero operand gives a zero product. The basic block needs zero detection
  for this; without it, P(0) for N1 = 0 would come out as N2.

This differs from Mitchell's classic logarithmic multiplier. Mitchell's
multiplier compares the mantissa sum x1+x2 with 1 before it can place the
result. This scheme has no such comparison. The next correction step can
therefore start as soon as the leading ones are removed, and that is what
makes the deep pipeline below possible.

Worked example, 234 x 198 = 46332:

| step | operands | term | running product |
|------|----------|------|-----------------|
| P(0) | 234, 198 | 38912 | 38912 |
| C(1) | 106, 70 | 7168 | 46080 |
| C(2) | 42, 6 | 232 | 46312 (default build) |
| C(3) | 10, 2 | 20 | 46332, exact |

## Basic block (`basic_block`, `basic_block_pipe`)

Datapath for n-bit operands. All wide words are 2n bits.

```
 n1 ─┬─ lod ─ onehot1 ─ priority_encoder ─ k1 ──┬──────────────┐
     └── clear leading one ── r1 ─ barrel_shifter_left(<<k2) ─┐ │
 n2 ─┬─ lod ─ onehot2 ─ priority_encoder ─ k2 ──┼───────────┐ │ │
     └── clear leading one ── r2 ─ barrel_shifter_left(<<k1)┤ │ │
                                                  (+) ◄─────┘ │ │
                 k1+k2 (+) ◄──────────────────────────────────┴─┘
                   │                                │
               k_decoder → 2^(k1+k2) ─────────────(+)── zero? 0 : P
```

* `lod` is the leading-one detector: a ripple chain of 2-to-1 multiplexers
  carrying "no '1' seen above this bit", plus one AND gate per bit. The end
  of the chain is the zero flag.
* `priority_encoder` turns the one-hot mask into k. Because its input is
  one-hot, it is a plain OR encoder.
* `barrel_shifter_left` is a logarithmic shifter, one multiplexer rank per
  bit of k.
* `k_decoder` turns k1+k2 into the one-hot word 2^(k1+k2).

`basic_block_pipe` has the same datapath, cut into four register stages:

| stage | computes | registered |
|-------|----------|------------|
| 1 | leading-one detection, k1, k2, residues | k1, k2, r1, r2, zero flag |
| 2 | k1+k2, both shifted residues | k1+k2, shifted residues, zero flag |
| 3 | 2^(k1+k2), sum of shifted residues | both, zero flag |
| 4 | final sum, cleared for a zero operand | P |

The stage-1 residue registers are ports (`r1`, `r2`). The next correction
block starts from them one cycle after this block started.

## Correction cascade

**Combinational, `ilm_comb`.** NUM_ECC+1 basic blocks in series, each fed
the residues of the one before, and a chain of adders for P(0)+C(1)+... .
This is simple, but the critical path grows with every ECC. The original
FPGA figures show the clock rate falling from about 58 MHz with no correction
to about 38 MHz with three corrections.

**Pipelined, `ilm_pipe`.** NUM_ECC+1 `basic_block_pipe`s in series. Block i
takes the stage-1 residues of block i-1, so it runs exactly one cycle behind
block i-1. Its term C(i) therefore arrives one cycle after C(i-1). The
running sum is registered once per step:

```
acc0 = reg(P(0))              valid at cycle 5
acc1 = reg(acc0 + C(1))       valid at cycle 6     (C(1) valid at 5)
...
p    = acc(E-1) + C(E)        not registered, valid at cycle 4+E  (E = NUM_ECC)
```

The latency is therefore 4+NUM_ECC cycles: 6 for the default, 4 for a bare
basic block. A product leaves every cycle whatever NUM_ECC is. Each
additional ECC costs one more basic block and one more adder and register,
but does not lengthen the clock period. The original FPGA figures show about
153 MHz for 0 to 3 ECCs. The last adder sits after the last register, so it
is the one path that ends in a combinational output.

`ilm_pipe` adds `in_valid`/`out_valid`, a shift register of the latency that
a synchronous active-low `rst_n` clears. The data path itself has no reset,
no enable and no stall. Hold-off has to be done by the surrounding logic,
which would use `out_valid` to ignore bubbles.

## Top level, `ilm_top`

The pipelined multiplier is the main data path. The combinational multiplier
stands beside it with its own ports. Both are built with the same N and
NUM_ECC and give identical values.

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock, rising edge |
| rst_n | in | 1 | synchronous active-low reset of the valid pipeline |
| in_valid | in | 1 | a, b hold operands this cycle |
| a, b | in | N | operands of the pipelined multiplier |
| out_valid | out | 1 | p holds a product |
| p | out | 2N | product of the operands applied 4+NUM_ECC cycles earlier |
| ca, cb | in | N | operands of the combinational multiplier |
| cp | out | 2N | their product, combinational |

Parameters: `N` (operand width, default 16) and `NUM_ECC` (default 2). The
defaults live in `ilm_pkg`. Any N ≥ 2 and NUM_ECC ≥ 0 elaborate.
NUM_ECC ≥ (N-1) adds nothing, because the product is exact by then.

## Accuracy

`tb_ilm_error_stats` multiplies every operand pair 1..2^n-1 at n = 8 and
n = 12, and 2^20 random pairs at n = 16. The results agree with the
published figures to within their rounding. The 16-bit values agree to
within the sampling noise:

| average relative error [%] | no ECC | 1 ECC | 2 ECC | 3 ECC |
|-----|-----|-----|-----|-----|
| 8 bit | 8.9131 | 0.8337 | 0.0708 | 0.0048 |
| 12 bit | 9.3692 | 0.9726 | 0.1029 | 0.0106 |
| 16 bit (sampled) | 9.408 | 0.9868 | 0.1070 | 0.0117 |

Share of products with relative error under 0.1 %, 0.5 % and 1 %:

| operand width | 1 ECC | 2 ECC | 3 ECC |
|-----|-----|-----|-----|
| 8 bit | 32.9 / 54.8 / 70.0 % | 79.9 / 96.9 / 99.6 % | 99.0 / 100 / 100 % |
| 12 bit | 20.6 / 48.1 / 65.6 % | 71.7 / 95.7 / 99.5 % | 98.2 / 100 / 100 % |

`tb_block_matching` runs the intended kind of application: block-matching
motion estimation on synthetic frames. It uses 7x7 blocks and correlates them
over 32x32 (all 676 blocks) and 48x48 (441 of the 1764 blocks) reference
regions. The multiplier receives one pixel pair per cycle, and the testbench
sums the correlations. With one ECC the average
correlation error is about 1.7 %, and about 14 % of blocks pick a different
best position than exact arithmetic would. With two ECCs the figures fall to
0.14 % and 3 %. These figures depend on the image statistics. The
original evaluation on CT frames reported about 0.55 % and 0.035 %, with
4 % and 0.2-0.6 % of blocks mismatched.

## Design choices beyond the published description

* **Zero handling.** A zero operand clears the basic block's final sum. The
  published description says that the LODs include zero detectors, but not
  where they act.
* **16-bit leading-one detector.** It is the 4-bit multiplexer/AND ripple
  chain extended to 16 bits. The published 16-bit unit follows an external
  reference that is not reproduced here.
* **Insides of the leaf blocks.** The priority encoder is a plain OR encoder,
  the barrel shifter is a log shifter and the decoder is a comparator per
  output bit. Only the names and functions of these blocks are given.
* **Handshake and reset.** Valid flags and the reset exist only on the valid
  pipeline. Register placement in the pipelined basic block and in the
  cascade, including the unregistered final adder, follows the published
  block diagrams.
* **Not built.** The Mitchell and operand-decomposition multipliers the
  design is compared against. The FPGA area, timing and power results cannot
  be reproduced in simulation.

## Files and simulation

`rtl/`: `ilm_pkg` (defaults, width and latency functions), `lod`,
`priority_encoder`, `barrel_shifter_left`, `k_decoder`, `basic_block`,
`basic_block_pipe`, `ilm_comb`, `ilm_pipe`, `ilm_top`.

`tb/`: one self-checking testbench per module (`tb_<module>`), the shared
reference `ilm_ref_pkg`, `tb_ilm_error_stats` and `tb_block_matching`. The
reference computes P(i) as N1*N2 - r1*r2 with ordinary multiplication, not
with the hardware's shift-and-add structure. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/ilm_pkg.sv tb/ilm_ref_pkg.sv tb/tb_ilm_top.sv --top-module tb_ilm_top
./obj_dir/Vtb_ilm_top
```

`tb_ilm_top` runs the top at its default parameters. It covers 20,000
cycles with random bubbles, zero operands, early-exact and approximate
products, and the worked example. It checks the 6-cycle latency. Most
testbenches run in well under a second. `tb_ilm_error_stats` takes about
20 s, and `tb_block_matching` about 50 s.

Verilator warns that some `ilm_pkg` parameters go unused in modules that do
not need them. The warning is harmless.
