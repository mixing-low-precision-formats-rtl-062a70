# Mixed-format multiply-accumulate GEMM kernel

This RTL is a matrix-multiply (GEMM) kernel for DNN training in which every
multiply-accumulate (MAC) unit mixes number formats:

- FP32 operands are rounded to an **8-bit E5M2 floating-point format** as they enter
  the array.
- The multiplier drops most IEEE-754 rules. It has no NaN codes and no subnormal
  handling, and it does not round.
- Its product is kept **exact in 12-bit E6M5**.
- Products are summed in an **E6M5 floating-point accumulator** (the default). A
  build-time option uses a float-to-fixed converter and a **Q8.13 fixed-point
  accumulator** instead.
- Results leave the array converted back to FP32. This conversion is exact.

The idea behind the formats: with 3-bit significands, a low-precision multiplier is
tiny. Its area depends more on how it treats exceptional values (subnormals,
NaN/infinity, output rounding) than on its bit width. So the multiplier keeps only
what training needs. It gives up the NaN codes, reads the exponent-0 codes as
ordinary numbers, and widens its output instead of rounding. The accumulator is
where rounding happens, once per product.

The array is a line of 16 processing elements (PEs) with 4 MACs each, so 64 MACs
work in parallel. Every MAC sums a whole dot product.

## Number formats

This is the part to read first. Every block depends on it.

### E5M2 operands (the "CFG5" encoding)

The format has 1 sign bit, 5 exponent bits and 2 mantissa bits, with bias 15.

| code (sign omitted) | value |
|---|---|
| exponent 0, mantissa 00 | zero |
| exponent 0, mantissa 01/10/11 | 1.m × 2^-15: 3.81e-5, 4.58e-5, 5.34e-5 |
| exponent 1..30 | 1.m × 2^(e-15) |
| exponent 31, mantissa 00/01/10 | 65,536, 81,920, 98,304 |
| exponent 31, mantissa 11 | infinity |

There is no NaN. The codes IEEE would spend on NaN are ordinary numbers, and
infinity is the single all-ones code. The exponent-0 codes are not subnormals: they
are read as normal numbers with the smallest exponent, so the multiplier needs no
normalising shifter. Below 2^-15, nothing but zero is representable.

Parameter `CFG=6` selects a variant that reads every exponent-0 code as zero.

### FP32 → E5M2 (`fp32_to_lpfp`)

- Rounding is to nearest, ties to even.
- Values beyond the largest finite value (98,304), FP32 infinities and NaNs become
  ±infinity.
- Below 2^-15 a value flushes to zero.
- A value of at least 2^-15 that would round onto the zero code becomes the smallest
  non-zero code instead.

### E6M5 products and sums

The 3-bit × 3-bit significand product has 6 bits and lies in [1, 4). One
normalising step therefore makes it an exact 1.xxxxx × 2^e. The exponent gains one
bit (bias 31), so the smallest possible product still has biased exponent 1.

The same 12-bit E6M5 encoding is used by the floating-point accumulator:

- Exponent 0 is zero or a conventional subnormal, 0.m × 2^-30. Products never land
  there, but sums can.
- Infinity is the all-ones exponent with an all-ones mantissa. There is no NaN.
- The largest finite value is 1.11110 × 2^32.
- An all-ones product mantissa is impossible (the largest significand product is
  7 × 7 = 49). A finite product therefore never collides with the infinity code.

### Q8.13 fixed point

The word is 21 bits in two's complement: 8 integer bits, including the sign, and 13
fraction bits. The range is ±128 with a resolution of 2^-13. The float-to-fixed
converter truncates toward zero. Values that do not fit, and infinity, clip to
±(2^20 − 1)/2^13. The accumulator saturates instead of wrapping.

## Multiply-accumulate unit

`mac_unit` has three parts: the multiplier, one of the two accumulators (chosen by
`ACC_FIXED`), and a small register file of `TN` running sums. It takes one product
per cycle. The multiply and add are combinational, and the selected running sum is
written at the clock edge.

**Multiplier (`lpfp_mult`).**

- The sign is an XOR.
- The significands are multiplied, each with its hidden 1 (the implicit leading
  bit).
- The biased exponent is ea + eb + 1 + (carry of the significand product).
- A zero operand gives a signed zero, an infinite operand gives infinity, and
  infinity × 0 also gives infinity.
- Exponents beyond 2^6 − 1 saturate to infinity.

There is no rounding, no subnormal path and no NaN logic.

**Floating-point accumulator (`lpfp_acc_add`).** This is a textbook adder built
around an (m+4)-bit adder. The four extra bits are the implicit bit, guard, round
and sticky.

1. Swap the operands so the larger magnitude comes first. The encoding without the
   sign is monotonic, so an unsigned compare of the codes works.
2. Shift the smaller significand right by the exponent difference. Bits shifted out
   are ORed into sticky.
3. Add or subtract.
4. Normalise: one right shift on a carry, or a left shift by the leading-zero count,
   limited so the exponent does not go below the minimum. When the limit applies,
   the result is subnormal.
5. Round to nearest, ties to even. A rounding carry can bump the exponent.
6. Saturate to infinity past 1.11110 × 2^32.

Special cases:

- An infinite operand propagates.
- For infinity + (−infinity), the running sum's infinity wins.
- An exact zero sum is +0, unless both operands are negative.

**Fixed-point path (`lpfp_to_fixed` + `fixed_acc_add`).** The converter is a barrel
shift selected by the product exponent. The adder is a 21-bit adder with overflow
detection that clips to the most positive or most negative value.

Accuracy and area trade off between the two paths:

- The fixed-point adder is the smaller of the two, and it adds without rounding.
- The converter in front of it costs about as much as the floating-point adder.
- Its 21-bit results also widen everything downstream, compared with 12 bits.
- The floating-point path is the default because it trains to FP32-level accuracy
  on both evaluated networks. Q8.13 does so on ResNet-20/CIFAR-10 only; ResNet-50
  needs Q11.13, which you get with `FX_I=11`.

**Running sums.** The `first` input makes the product start a new sum instead of
being added to the stored one, so a tile needs no clearing pass. The `ovf` output
pulses when a written result is infinity (float) or was clipped (fixed).

## The GEMM array

```
            A (FP32) ──► fp32_to_lpfp ──┐      B (FP32 x4) ──► fp32_to_lpfp x4 ──┐
                                        ▼                                         ▼
   PE 0:  [A stage]──► a_next ──► a_cur ──► MAC MAC MAC MAC ◄── [B stage, 4 lanes]
             │                              │   │   │   │              │
             ▼                              ▼   ▼   ▼   ▼              ▼
   PE 1:  [A stage] ...            [C regs x4] ◄── from PE 1        [B stage] ...
   ...                                  │
   PE 15                                ▼
                       acc_to_fp32 x4 ──► C (FP32 x4)
```

Each PE (`gemm_pe`) has three chains of registers:

- **A chain.** This is one register stage per PE. Each value carries a tag that
  names its destination PE. A PE copies the value with its own tag into `a_next`. When
  the first B vector of a new k step enters, `a_next` moves to `a_cur`, the
  operand all 4 MACs use. This double buffer lets column k+1 of A load while
  column k is still in use.
- **B chain.** This is one 4-lane stage per PE. Each lane feeds one MAC. The stage
  also carries control: valid, first of a k step, k = 0, and the column block.
- **C chain.** Four result registers per PE. They load the MAC sums of one column
  block, then shift toward PE 0 and out through the FP32 converters.

A and B move up the line one PE per cycle. All A/B registers and MAC writes share
one enable, so when an input the array needs is missing, the whole array stalls.

### Tile and stream order (`gemm_top`)

One tile computes C = A × B. A is 16 × K, B is K × 64 (TN = 16 column blocks of 4),
and C is 16 × 64. MAC j of PE p holds C[p][blk·4 + j] for every blk.

| stream | beat | order |
|---|---|---|
| A | one FP32 value | A[0][k] … A[15][k], for k = 0 … K−1 |
| B | four FP32 values | B[k][blk·4 +: 4], for blk = 0 … 15, for k = 0 … K−1 |
| C | four FP32 values + `c_row`, `c_blk` | rows 0 … 15, for blk = 0 … 15 |

All three are valid/ready streams. A beat moves when both are high. `a_ready`
depends on `b_valid`, and `b_ready` on `a_valid`, because A and B beats are taken
together. `valid` must not depend on `ready`.

Phases after `start`, when `k_len` = K is sampled:

1. **Preload.** 16 A beats load column 0.
2. **Run.** K × 16 beats. Each beat takes one B vector. During the first 16 beats of
   every step except the last, it also takes one A value of the next column.
3. **Flush.** 16 cycles for the last B vector to reach PE 15.
4. **Drain.** For each of the 16 column blocks: one cycle to load the C chain, then
   16 output beats. `done` pulses with the last beat.

With no gaps on the streams, a tile takes **16 + 16·K + 16 + 16·17 cycles**. During
the run phase all 64 MACs work every cycle; `TN ≥ N_PE` is what makes that
possible. Draining does not overlap the next tile.

`inf_seen` is a sticky flag, cleared by `start`. It is set when any MAC produced
infinity (or clipped, in the fixed-point build). Host software running adaptive loss
scaling uses this overflow signal: it skips the iteration and halves the scale.
Infinity also appears in the C data.

## Parameters (`gemm_top`)

| parameter | default | meaning |
|---|---|---|
| `N_PE` | 16 | PEs in the line |
| `N_MAC` | 4 | MACs per PE |
| `TN` | 16 | column blocks per tile (sums per MAC); must be ≥ `N_PE` |
| `K_W` | 24 | width of `k_len` |
| `IN_E`, `IN_M` | 5, 2 | operand format EeMm; products are E(e+1)M(2m+1) |
| `CFG` | 5 | 5: exponent-0 codes are numbers; 6: they are zero |
| `ACC_FIXED` | 0 | 0: E6M5 float accumulator; 1: Q8.13 fixed point |
| `FX_I`, `FX_F` | 8, 13 | fixed-point format (`FX_I` includes the sign) |

Shared defaults live in `rtl/lpfp_pkg.sv`. The float datapath is written for
general EeMm, but only E5M2 → E6M5 is verified. The testbench reference model is
specific to that format.

## Where this design departs from or goes beyond its source

These parts follow the source design:

- the formats, the multiplier policy, the accumulator structure, the array shape
  (16 × 4), and the FP32 conversions at the array boundary;
- infinity for out-of-range values and its propagation.

These are this implementation's own choices:

- **Dataflow.** The tile shape, the TN running sums per MAC, the tagged A chain with
  its double buffer, the stream order, the drain protocol, and the valid/ready
  handshakes. The original kernel is an HLS design whose internals are only sketched.
- **Rounding and edge cases:**
  - the nearest-even tie rule;
  - the underflow rule of the FP32 → E5M2 converter;
  - truncation in the float-to-fixed converter;
  - infinity × 0 = infinity;
  - the result of infinity + (−infinity).
- **Memory.** Memory access (DDR4, AXI, reading transposed matrices) is not part of
  this RTL. The host or a DMA must produce the streams in the order above.
- **Timing.** The MAC is a single-cycle combinational multiply-add with no pipeline.
  The original ran at 280 MHz on an UltraScale+ FPGA; no timing closure has been
  attempted here.
- **Multiplier variants.** Only CFG5 and CFG6 are built. The variants with subnormal
  inputs/outputs, NaNs and output rounding (CFG1–CFG4) are not.

## Verification

Each testbench in `tb/` checks against `tb/lpfp_ref_pkg.sv`. This is an independent
reference model:

- E6M5 values are handled as exact integers scaled by 2^35 and rounded by integer
  comparison, not with guard/round/sticky bits.
- E5M2 conversion is a nearest-even search over all 128 codes.

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_lpfp_mult` | all 65,536 operand pairs, for CFG5 and CFG6 |
| `tb_lpfp_acc_add` | 200,000 pairs, biased toward cancellation, subnormals and overflow |
| `tb_fp32_to_lpfp` | every code, its neighbours and tie points, random values, specials |
| `tb_lpfp_to_fixed` | all 4,096 E6M5 codes |
| `tb_fixed_acc_add` | random sums, including overflow both ways |
| `tb_acc_to_fp32` | all E6M5 codes, and Q8.13 random values and edges |
| `tb_mac_unit` | float and fixed MACs on the same stream with stalls, restarts and overflow |
| `tb_gemm_pe` | chain forwarding, stall hold, tag capture, the A double buffer, C load and shift |
| `tb_gemm_top` | the full-size kernel (defaults) on three tiles, described below |
| `tb_gemm_top_fixed` | the same three tiles with `ACC_FIXED=1` |
| `tb_gemm_workloads` | full-size tiles with K = 576, 2048 and 4608, no gaps, every output and the cycle count checked |

The three tiles of `tb_gemm_top`:

1. Random gaps on A and B, and random `c_ready`.
2. Forced overflow to infinity, checked through `inf_seen`.
3. No gaps, with the exact cycle count checked.

It also counts that stalls, back-pressure, A double-buffer swaps and overflow all
occurred.

To run one testbench with Verilator, name the two packages and the testbench. The
`-y rtl` option lets Verilator find the modules in `rtl/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl --top-module tb_gemm_top \
    rtl/lpfp_pkg.sv tb/lpfp_ref_pkg.sv tb/tb_gemm_top.sv
./obj_dir/Vtb_gemm_top
```

`tb_gemm_workloads` uses reduction lengths taken from real training layers: a 3x3
convolution over 64 channels (K = 576), one tile of a 2048 x 2048 GEMM (K = 2048) and a
3x3 convolution over 512 channels (K = 4608). It prints the achieved MACs per cycle:
62.0, 63.4 and 63.7 of 64, because the fixed drain and output phase of each tile is
amortised over longer reductions. It takes a few seconds.

Replace `tb_gemm_top` with any testbench name. The full-size top-level run takes
well under a second.
