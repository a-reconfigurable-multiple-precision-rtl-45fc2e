# Reconfigurable multiple-precision floating-point dot product unit

This is the RTL of a floating-point dot product unit (DPU) that runs FP16,
FP32 and FP64 on one shared set of multipliers, and keeps every multiplier
busy in all three precisions. The whole design rests on one choice: the
**12-bit unit multiplier**. Any wider significand is cut into 12-bit segments.

| precision | significand | segments | 12b multiplications per product |
|-----------|-------------|----------|---------------------------------|
| FP16      | 11 bits     | 1        | 1                               |
| FP32      | 24 bits     | 12:12    | 4                               |
| FP64      | 53 bits     | 5:12:12:12:12 | 25 (16 × 12b·12b, 8 × 12b·5b, 1 × 5b·5b) |

Twelve bits is the smallest width that wastes nothing on FP32 and little on
FP16 (one bit) and FP64 (seven bits over five segments). One DPU has ten unit
multipliers: six conventional ones and four *fused* ones. A fused multiplier
can also compute two 12b×5b products, or a 12b×5b and a 17b×5b product, in
one pass. That lets the 25 small FP64 multiplications fit into 20 multiplier
slots, which is exactly ten multipliers over two cycles. So every operation
takes two cycles:

* **FP16**: the sum of 20 products (10 pairs per cycle);
* **FP32**: the sum of 5 products (20 segment products, 10 per cycle);
* **FP64**: one product, exact to all 106 bits before rounding.

One operation starts every two cycles, in any mix of precisions. The result
is rounded once with roundTiesToAway.

## Data flow through one DPU

```
 in_a, in_b (160b), in_prec (2b)
        |
   INPUT REGS
        |
 input_proc ─ splits each value into sign, exponent and 12-bit segments
        |      and gives each of the 10 lanes its operands and segment offset
 6 × fp_cal  +  4 × fp_cal_mix     (sign XOR, ea+eb-bias, 24-bit product)
 find_max_exp, 10 × exp_diff       (delta = max - e)
        |
   PIPELINE0 REGS
        |
 10 × align_shifter   {sign, product, 36'b0} >> (delta + segment offset),
        |             then two's complement           (61-bit terms)
 adder_tree           4:2, 4:2 | 3:2, 3:2 | 4:2 | (+carry) | CPA   (65 bits)
 accumulation         adds cycle 2 to the stored cycle-1 sum      (66 bits)
 output_process       sign/magnitude, or the FP64 splice          (107 bits)
 lza, exp_adder       leading-zero count, result exponent
        |
   PIPELINE1 REGS  (also keep the cycle-1 sum for cycle 2)
        |
 norm_shift, rounding (roundTiesToAway, exponent correction, packing)
        |
   OUTPUT REGS -> sign_out (1b), exp_out (11b), man_out (52b)
```

### The aligned window

Every partial product goes into one 61-bit signed term. The 24-bit unit
product sits just below the sign bit and 36 zero guard bits sit under it.
It is then shifted right by the sum of two amounts:

* `delta`: how far the product's exponent is below the largest exponent of
  the cycle;
* `seg_shift`: where its segments sit in the full product.

The two segment index sums i and j fix `seg_shift`:

* FP16: `seg_shift = 0`.
* FP32: `seg_shift = 12·(2 − (i+j))`. The a1·b1 product sits at the top of
  the window, and the whole 48-bit product spans bits 59..12.
* FP64: `seg_shift = 36 − 12·(i+j)` in cycle 1 and `36 − 12·(i+j−4)` in
  cycle 2. Each 60-bit window is then a plain integer: PP1 at bit 0 and
  PP10 at bit 36.

The window is worth `V · 2^(max_exp − K)`, with K = 71, 185 and 1127 for
FP16, FP32 and FP64 (`dpu_pkg::scale_k`). `exp_adder` turns this into the
result exponent once the leading one is found.

### How FP32 uses the two cycles

Product p (p = 0..4) uses lanes 2p and 2p+1:

* cycle 1: a0·b0 and a0·b1;
* cycle 2: a1·b0 and a1·b1.

Both cycles see the same five operand pairs, so they have the same largest
exponent. The cycle-1 tree sum is kept in the PIPELINE1 registers and added
to the cycle-2 sum.

### How FP64 uses the two cycles

| cycle | lane 0..5 (conventional) | lane 6..9 (fused) |
|-------|--------------------------|-------------------|
| 1 | a0b0 (<<0), a0b1, a1b0 (<<12), a0b2, a2b0, a1b1 (<<24) | a0b3, a1b2, a2b1, a3b0 (<<36) |
| 2 | a1b3, a3b1, a2b2 (<<48), a2b3, a3b2 (<<60), a3b3 (<<72) | a0b4+a4b0 (<<48), a1b4+a4b1 (<<60), a2b4+a4b2 (<<72), a4b3+{a4,a3}b4 (<<84) |

In cycle 1 the ten products sum to a value below 2^63:

* its low 48 bits are final (Sum1);
* bits 63..48 (16 bits) are the carry into cycle 2. They enter the
  cycle-2 tree through an extra 3:2 row.

Cycle 2 produces the upper 58 bits (Sum2). `output_process` joins the two
halves into the exact 106-bit significand product `{Sum2, Sum1}`. The last
fused lane covers three products at once:

`{a4,a3}·b4 + a4·b3 = a3·b4 + a4·b3 + (a4·b4 << 12)`

In FP64 all terms stay positive, and the product sign is applied at the output.

### How FP16 uses the two cycles

Each cycle brings ten new pairs, so the two cycle sums can be aligned to
different largest exponents. `accumulation` shifts the sum with the smaller
exponent right (arithmetic shift) by the gap before adding. Its `realigned`
output marks when this happens.

## The fused radix-4 Booth multiplier (`fused_mul`)

Both multiplier types are unsigned radix-4 Booth multipliers. They scan the
12-bit multiplicator C, with a zero appended below it, in seven overlapping
3-bit groups. Each group gives one row: 0, ±X or ±2X. The rows are compressed
in three steps:

1. PP1..PP3 go through a 3:2 row.
2. PP4..PP7 go through a 4:2 row.
3. A final 4:2 row merges the two, and a carry-propagate adder gives the
   24-bit result.

The fused version changes only the second group of rows:

| mode (`fmode_e`) | result | PP4..PP6 multiplicand | PP4..PP6 shift |
|------------------|--------|-----------------------|----------------|
| `FM_12X12` | A·C | A | 6, 8, 10 |
| `FM_2X12X5` | A·C[4:0] + B·C[10:6] | B | 0, 2, 4 |
| `FM_12X5_17X5` | A·C[4:0] + {C[4:0],B}·C[10:6] | {C[4:0], B} (17 bits) | 0, 2, 4 |

In the split modes, bits C[5] and C[11] must be zero. They are the sign bits
of the two 5-bit multiplicators, and the block forces them to zero. With
C[5] at zero, Booth rows 1–3 see only C[4:0] and rows 4–6 see only C[10:6].
PP7 becomes zero. All rows are 24-bit two's complement, added modulo 2^24.
This is exact because every result is below 2^24.

## Interface and timing

`dpu` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of the control state |
| `in_valid` | in | 1 | high for two successive cycles per operation (beat 0, beat 1) |
| `in_prec` | in | 2 | `PREC_FP16`=0, `PREC_FP32`=1, `PREC_FP64`=2; sampled on beat 0 |
| `in_a`, `in_b` | in | 160 | operand words |
| `out_valid` | out | 1 | one-cycle pulse per result |
| `out_prec` | out | 2 | precision of the result |
| `sign_out`, `exp_out`, `man_out` | out | 1, 11, 52 | result fields, right-justified |

Operand packing:

| precision | operands | beat 0 | beat 1 |
|-----------|----------|--------|--------|
| FP16 | element k in bits `[16k+15:16k]`, k = 0..9 | first 10 pairs | next 10 pairs |
| FP32 | element k in `[32k+31:32k]`, k = 0..4 | all operands | ignored |
| FP64 | `[63:0]` | all operands | ignored |

The result uses the format of its operation. FP16 uses `exp_out[4:0]` and
`man_out[9:0]`; FP32 uses `exp_out[7:0]` and `man_out[22:0]`.

Latency: `out_valid` rises 4 clock edges after the edge that samples beat 0.
Operations may follow back to back, one every two cycles, and may change
precision each time. An assertion flags a beat 0 that is not followed by a
beat 1.

`dpu_array` (the top) puts `N_DPU` units side by side (default 4). They share
`in_valid` and `in_prec`, and each has its own operand words (`in_a[d]`,
`in_b[d]`) and result (`sign_out[d]`, `exp_out[d]`, `man_out[d]`). All units
run in lock step.

## Numerics: what is exact and what is not

* **FP64** products are exact before rounding, so every FP64 result is
  correctly rounded (ties away from zero).
* **FP16 and FP32** sums are exact, and so correctly rounded, as long as no
  product falls off the bottom of the 61-bit window:
  * FP16: the spread of product exponents in the operation stays within 36;
  * FP32: it stays within 12.

  Past that, low bits are cut off with no sticky bit, like a truncating
  accumulator. The cycle-2 realignment in FP16 also cuts bits off.
* **Rounding**: roundTiesToAway. If the first dropped bit is 1, the
  magnitude goes up. When that carries out of the significand, the
  exponent is corrected.
* **Special cases** (this design's own choices):
  * a zero sum gives +0;
  * a result below the normal range becomes a signed zero (no subnormal
    outputs);
  * a result at or above the largest exponent becomes a signed infinity.
* **Subnormal inputs** are exact: a zero exponent field means hidden bit 0
  and exponent 1.
* **Infinity and NaN inputs** get no special handling. They are treated as
  ordinary large numbers.

## Where this RTL departs from the published architecture

* **Exponent width.** Exponents inside the unit are 13-bit signed. The
  published block diagram shows 11 bits, but an FP64 product exponent does
  not fit in 11 bits. `delta` stays 11 bits and saturates.
* **Leading zeros.** The count is exact and taken from the finished
  magnitude, not anticipated from the adder inputs. It sits in the same
  stage, so the pipeline depth is unchanged.
* **4:2 compressors.** They use a common per-bit 4:2 cell with a one-cell
  lateral carry. The speed-tuned custom cell is not reproduced gate for
  gate; the sums are the same.
* **Sign extension in the adder tree.** The tree sign-extends its inputs to
  65 bits once, instead of one or two bits per level.
* **FP64 carry.** The 16-bit carry enters the tree through an extra 3:2 row
  before the final adder.
* **Fused multiplier operands.** The fused lanes take three 12-bit
  significand operands (A, B, C), because the split modes need three.
* **Choices the published design leaves open:**
  * which two FP32 partial products run in cycle 1;
  * how FP16 combines two cycles with different exponents;
  * the operand packing, handshake, reset, result format and special-value
    handling.

  Each is described above.
* **Around the array.** The software interface that feeds the array and the
  memory interface that takes its results are not part of this RTL. Their
  signals are the ports of `dpu_array`.

## Files

`rtl/` (one module or package per file):

* `dpu_pkg.sv`: precision and fused-mode enums, widths, the `lane_t` operand
  bundle, format constants, Booth row selection.
* `dpu_array.sv` (top), `dpu.sv`.
* `input_proc.sv`, `fp_cal.sv`, `fp_cal_mix.sv`, `booth_mul.sv`,
  `fused_mul.sv`, `csa32.sv`, `csa42.sv`.
* `find_max_exp.sv`, `exp_diff.sv`, `align_shifter.sv`, `adder_tree.sv`,
  `accumulation.sv`, `output_process.sv`.
* `lza.sv`, `exp_adder.sv`, `norm_shift.sv`, `rounding.sv`.

`tb/`:

* `tb_ref_pkg.sv` is the reference model. It computes each dot product as an
  exact 512-bit integer, rounds it ties-away, and provides random and
  directed test operations.
* Every module has a self-checking testbench `tb_<module>.sv`.
* `tb_dpu.sv` runs 600 random and directed operations through one unit and
  checks each result and its latency.
* `tb_dpu_array.sv` runs the top at its default size.

Both end-to-end testbenches count how often each mechanism fires, and fail
if one never does. The mechanisms are:

* each precision;
* both split modes of the fused multiplier;
* the FP64 carry;
* FP16 realignment;
* rounding up, and a rounding carry into the exponent;
* overflow, underflow and zero results;
* precision switches and back-to-back operations.

`tb_mixed_workload.sv` runs mixed-precision streams of 100 products, at 0 to
100 % low-precision share. It measures cycles and reports throughput against
fixed FP32 and FP64 units, reaching 4× (FP16 against FP32) and 20× (FP16
against FP64) at 100 % FP16.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. To
build and run one with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/dpu_pkg.sv tb/tb_ref_pkg.sv tb/tb_dpu_array.sv \
  --top-module tb_dpu_array -Mdir obj_dpu_array
./obj_dpu_array/Vtb_dpu_array
```

Replace `tb_dpu_array` with any other `tb_<name>`; Verilator finds the
modules it needs in `rtl/` through `-Irtl`. For lint, use
`verilator --lint-only -Wall -Irtl rtl/dpu_pkg.sv rtl/<module>.sv`. The
remaining warnings are unused bits: spare struct fields in the multiplier
lanes, and status signals of `dpu` that only the testbenches observe.

## Changing the design

* **Number of units:** `dpu_array #(.N_DPU(n))`.
* **Widths:** the widths in `dpu_pkg` follow from the 12-bit segmentation
  and the 61-bit window. Changing one usually means changing `input_proc`
  (segment offsets) and `scale_k` together.
* **Sticky bit:** to make FP16/FP32 results correctly rounded for any
  exponent spread, add a sticky bit to `align_shifter` and `accumulation`
  and use it in `rounding`.
