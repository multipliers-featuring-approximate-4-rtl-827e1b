# Approximate multiplier with one-sided 4-2 compressors and error recovery

An unsigned N x N multiplier that gives up a little accuracy in the low half
of the product in exchange for a smaller, faster and lower-power
partial-product tree. The key is an approximate 4-2 compressor whose errors
all go the same way: it is exact except when two particular inputs, x3 and
x4, are both 1, and then its result is always exactly one too small. Because
the error has a fixed sign and a one-gate detector (`x3 & x4`), a few AND-OR
gates can add back what was lost at the place where it matters most: the top
column of the approximate part of the tree.

Everything is combinational: operands `a`, `b` in, `product` out, no clock,
no registers, no latency in cycles.

## The compressor

A 4-2 compressor takes four bits of the same weight and returns a carry
(weight 2) and a sum (weight 1). An exact one also needs a carry-in and a
carry-out, because four ones make 4, which does not fit in two bits. The
approximate compressor (`rtl/approx_compressor42.sv`) has neither:

    carry = x1 x2 + x1 x3 + x1 x4 + x2 x3 + x2 x4
    sum   = (x1 ^ x2) ^ (x3 | x4)

| x4 x3 x2 x1 | carry sum | exact count | error |
|-------------|-----------|-------------|-------|
| x4 x3 != 11 | exact     | 0 .. 3      | 0     |
| 1 1 0 0     | 0 1       | 2           | -1    |
| 1 1 0 1     | 1 0       | 3           | -1    |
| 1 1 1 0     | 1 0       | 3           | -1    |
| 1 1 1 1     | 1 1       | 4           | -1    |

The well-known earlier approximate compressor has the extra product term
`x3 x4` in the carry. For input 1100 that makes it answer 3 instead of 2 (+1),
while its other three errors are -1. Dropping the term turns that one +1 into
a -1. The gate count goes down, and every error now has the same sign.
Partial-product bits are 1 with probability 1/4, so the error case
x3 = x4 = 1 happens for 1/16 of the inputs.

The accurate part of the tree uses a standard exact 4-2 compressor
(`rtl/exact_compressor42.sv`) in XOR/multiplexer form:
`cout = (x1^x2) ? x3 : x1`, which does not depend on `cin`. A row of them
chained `cout -> cin` therefore settles after one compressor delay.

## Regions of the partial-product array

The N partial-product rows (`rtl/pp_generator.sv`, row i = `a & b[i]`
shifted by i) cover columns 0 .. 2N-1, and the columns fall into three regions
(`rtl/mult_pkg.sv`):

| region      | columns          | 8-bit | treatment                            |
|-------------|------------------|-------|--------------------------------------|
| truncated   | 0 .. TRUNC-1     | 0-3   | partial products not generated       |
| approximate | TRUNC .. N-1     | 4-7   | approximate 4-2 compressors          |
| accurate    | N .. 2N-1        | 8-15  | exact 4-2 compressors, chained       |

For 8 bits this is the intended split: 4 truncated, 4 approximate, 7 accurate
columns (column 15 only receives carries). For 16 and 32 bits the accurate
region still starts at column N. `TRUNC` defaults to N/2, which is this
design's own scaling of the 8-bit split.

## The compression tree

`log2(N) - 1` steps of 4-2 compression take the N rows down to 2 (8 bits:
8 -> 4 -> 2; 32 bits: 4 steps). In every step the rows are taken in groups
of four, rows 4g..4g+3 as x1..x4, and each group gives a sum row (2g) and a
carry row (2g+1). `rtl/compressor_group.sv` is one such group over all
columns. In each column it picks the compressor its region calls for. The
carry of the approximate compressor in column N-1 simply enters the accurate
region at column N. The approximate compressors never pass carries sideways,
so the approximate region has no carry chain at all.

The last two rows go through an ordinary adder (`rtl/final_adder.sv`).

## Error recovery

Only the first compression step is corrected, and only in column N-1, the
most significant approximate column. There, each group of four
partial-product rows has one approximate compressor, so there are N/4 of
them. An error in one of them costs exactly 2^(N-1).

`rtl/error_recovery.sv`:

    err_detect[g] = x3[g] & x4[g]                       (g = 0 .. N/4-1)
    er_carry[p]   = err_detect[2p] | err_detect[2p+1]   (p = 0 .. N/8-1)

Each `er_carry[p]` is the carry-in of column N, the lowest exact column,
of group 2p+1 in the first step. It adds 2^N, which is two column-(N-1)
errors' worth. When both compressors of a pair are wrong, the correction is
exact. When only one is wrong, the result overshoots by 2^(N-1) instead of
falling short by 2^(N-1): the error has the same size but the other sign.
This pulls the error distribution toward zero (see Accuracy). The whole module is two gate levels:

| N  | detections | recovery carries |
|----|------------|------------------|
| 8  | 2          | 1                |
| 16 | 4          | 2                |
| 32 | 8          | 4                |

Errors in later steps and in lower approximate columns are not corrected.

## Accuracy

The default 8-bit multiplier was run on all 65536 operand pairs:

| metric                    | this design | proposed compressor, no recovery | earlier compressor, no recovery |
|---------------------------|-------------|----------------------------------|---------------------------------|
| mean error distance (MED) | 31.68       | 47.25                            | 35.80                           |
| maximum error distance    | 353         | 609                              | 609                             |
| exact products            | 10880       | 10816                            | 10816                           |
| mean signed error         | -16.25      | -47.25                           | -11.86                          |
| RMS error                 | 55.0        | 88.3                             | 67.5                            |

The two comparison columns use the same tree and truncation. They come from
a bit-level model, not from RTL. Without recovery, the one-sided compressor
is worse than the earlier one: its errors all add up in one direction.
With the recovery carry it beats both in MED, maximum error and RMS error.
The MED is 11.5% lower than with the earlier compressor. The published
improvement for this design is 11.7%, which supports the reading of the tree
and of the recovery given above. One published figure differs: the earlier
and the proposed designs are said to give the same number of exact products.
Here the recovery carry makes 64 more products exact (10880 against 10816).
The published tree may differ from this one in some detail.
Truncation makes most outputs inexact. The error is not one-sided at product
level, because the recovery can overshoot. Of the 65536 signed errors
(approximate minus exact), 41200 lie in -64..-1 and 12560 in 0..63; 112 are
below -256, and none is above 191. `tb_approx_multiplier` prints the full
histogram.

Image sharpening with a 5x5 Gaussian kernel (weights 1..41, sum 273) is the
application test. Only the 25 products per pixel are approximate: the pixel
is `a`, the kernel weight is `b`. Three generated 32x32 images give a PSNR of
50.4 to 51.0 dB against exact sharpening. Published figures for natural
images are 48 to 54 dB.

## Parameters

| module              | parameter | default | meaning                                |
|---------------------|-----------|---------|----------------------------------------|
| `approx_multiplier` | `N`       | 8       | operand width; a power of two, >= 8    |
| `approx_multiplier` | `TRUNC`   | N/2     | truncated columns                      |
| `error_recovery`    | `NGROUPS` | 2       | first-step groups, N/4 (even)          |
| `final_adder`       | `W`       | 16      | 2N                                     |

16 and 32 bits are `approx_multiplier #(.N(16))` and `#(.N(32))`. Both are
tested. `TRUNC` can be set to 0 to drop truncation.

## Where this design makes its own choices

- **Grouping of rows in the tree.** Consecutive rows form a group. The x1..x4
  order follows the row index. Sum and carry rows alternate. With this
  grouping the 8-bit top approximate column has exactly two four-bit
  compressors in the first step. Another grouping would give another
  accuracy.
- **Pairing of detections.** The detections of adjacent groups (2p, 2p+1)
  are OR'ed together. Group 2p+1 receives the carry; which group receives it
  does not change the result.
- **Approximate compressors in every step.** They are used in every step, not
  only the first. Only the first step is corrected.
- **Accurate region.** Every column there uses an exact 4-2 compressor, with
  absent inputs tied to 0. A hand-optimised tree would put full and half adders
  where columns are short. The result is the same, but the area differs.
- **Final adder.** Written as `+`, so the adder architecture is left to
  synthesis.
- **Width of the truncated region.** N/2 for N other than 8.
- **Timing.** Purely combinational, with no pipeline registers.
- The product is taken modulo 2^2N; nothing is ever lost there.

The area, power and delay savings claimed for this kind of multiplier (about
23% area, 22-25% power and 11-17% delay against an exact multiplier in a 65 nm
library) were not reproduced here.

## Files

| file                               | content                                           |
|------------------------------------|---------------------------------------------------|
| `rtl/mult_pkg.sv`                  | region enum and helpers, step count               |
| `rtl/approx_multiplier.sv`         | top: generator, tree, recovery, adder             |
| `rtl/pp_generator.sv`              | AND array with truncation                         |
| `rtl/compressor_group.sv`          | one group of four rows -> two rows                |
| `rtl/approx_compressor42.sv`       | the approximate compressor                        |
| `rtl/exact_compressor42.sv`        | exact compressor                                  |
| `rtl/error_recovery.sv`            | detection ANDs and recovery ORs                   |
| `rtl/final_adder.sv`               | final carry-propagate adder                       |
| `tb/approx_mult_ref_pkg.sv`        | reference model for the testbenches               |
| `tb/tb_approx_multiplier.sv`       | exhaustive 8-bit test, mechanisms, error metrics  |
| `tb/tb_approx_multiplier_wide.sv`  | 16- and 32-bit random tests                       |
| `tb/tb_sharpen.sv`                 | image-sharpening workload, PSNR                   |
| `tb/tb_<block>.sv`                 | one self-checking test per block                  |

The reference model reduces only the approximate region, bit by bit, using
the compressor's truth table. It adds the accurate region as plain integers.
It therefore shares no code and no structure with the RTL tree, apart from
the grouping rule.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mult_pkg.sv tb/approx_mult_ref_pkg.sv tb/tb_approx_multiplier.sv \
        --top-module tb_approx_multiplier -o sim
    ./obj_dir/sim

To run another test, swap in its file and `--top-module`. Package files
must come first. Each test runs in a few seconds.
