# Vedic (Urdhva Tiryakbhyam) multiplier, 2x2 up to 32x32

An unsigned binary multiplier built as a tree. Each stage splits both operands in half, forms
the four half-size products at the same time, and joins them with two adders. The rule it
follows is the "vertically and crosswise" method (Urdhva Tiryakbhyam) from Vedic arithmetic.
The two *vertical* products (high×high, low×low) and the two *crosswise* products
(low×high, high×low) are formed at once. Then the crosswise column is added, carrying into
the column above it. For N-bit operands X = XH·2^H + XL and Y = YH·2^H + YL, with H = N/2:

    X·Y = XL·YL  +  (XL·YH + XH·YL)·2^H  +  XH·YH·2^N

All the logic is combinational. There is no clock, no reset and no pipeline: the product
follows the operands after the propagation delay of the tree.

| module                | operands | product | made of                                   |
|-----------------------|----------|---------|-------------------------------------------|
| `vedic_32x32` (top)   | 32, 32   | 64      | 4 × `vedic_16x16`, 2 × `vedic_adder_circuit #(32)` |
| `vedic_16x16`         | 16, 16   | 32      | 4 × `vedic_8x8`,   2 × `vedic_adder_circuit #(16)` |
| `vedic_8x8`           | 8, 8     | 16      | 4 × `vedic_4x4`,   2 × `vedic_adder_circuit #(8)`  |
| `vedic_4x4`           | 4, 4     | 8       | 4 × `vedic_2x2`,   2 × `vedic_adder_circuit #(4)`  |
| `vedic_2x2`           | 2, 2     | 4       | 4 AND bit products, 2 × `half_adder`      |
| `vedic_adder_circuit` | 3 × W    | W+2     | one three-operand binary addition         |
| `half_adder`          | 1, 1     | 2       | XOR / AND                                 |

Each multiplier size is a usable module in its own right, with ports `x`, `y`, `z`. The 2x2
leaf uses `a`, `b`, `s`. The 32x32 multiplier is the top.

## How one stage recombines its four products

This is the part of the structure that is easiest to get wrong. A stage of operand width N
has four N-bit partial products: `pp_hh`, `pp_lh` (XL·YH), `pp_hl` (XH·YL) and `pp_ll`. The
2N-bit result `z` is assembled in three slices:

1. **Low slice, `z[H-1:0]`.** These are the low H bits of `pp_ll`. Nothing else has weight
   below 2^H, so they are final at once.
2. **Middle slice, `z[N-1:H]`.** The *middle adder circuit* forms
   `mid_sum = pp_lh + pp_hl + pp_ll[N-1:H]`. Its low H bits are this slice.
3. **High slice, `z[2N-1:N]`.** The *upper adder circuit* forms
   `pp_hh + mid_sum[N+1:H]`, and its low N bits are this slice.

The operand passed from the middle adder to the upper one is `mid_sum[N+1:H]`. That is the
upper half of the middle sum **together with its carry out**. Dropping that carry (passing only
`mid_sum[N-1:H]`) gives a multiplier that is right on most small operands and wrong whenever
the crosswise column overflows. At full width that happens in about 7% of random operand
pairs.

Two bounds keep the widths small:

* `mid_sum` never reaches 2^(N+1). Each crosswise product is at most (2^H−1)², and the third
  term is below 2^H. The middle carry is therefore 0 or 1, even though the adder is
  `N+2` bits wide.
* The upper adder never carries out of bit N−1, because X·Y < 2^(2N). Each stage has a
  deferred assertion (`assert final`) that checks its upper adder's two carry bits stay zero.

## The 2x2 leaf

For `a = a1a0`, `b = b1b0`:

    s1 = a0·b0                       vertical, weight 1
    a0·b1 + a1·b0  -> s2, carry c1   crosswise, weight 2
    a1·b1 + c1     -> s3, carry s4   vertical, weight 4 and 8

The bit products are AND gates and both additions are half adders. The result is
`s = {s4, s3, s2, s1}`. Only 3×3 = 9 sets `s4`.

## The adder circuit

`vedic_adder_circuit #(W)` adds three W-bit operands into a W+2-bit sum. Both adders of a
stage use this module; the upper one gets zero as its third operand. W is the operand width of
the multiplier that uses it: 32 in the 32x32 stage, 16 in the 16x16 stage, and so on. The
addition is written as a plain `+`, so the synthesis tool picks the adder architecture, for
example an FPGA's carry chain. The structure fixes only which columns are added, not how
each addition is built.

## Interfaces and timing

All modules are combinational. Their outputs depend only on their current inputs. The
operands are unsigned. The top:

| port | dir    | width | meaning        |
|------|--------|-------|----------------|
| `x`  | input  | 32    | multiplicand   |
| `y`  | input  | 32    | multiplier     |
| `z`  | output | 64    | product `x*y`  |

To multiply 8-bit or 16-bit numbers on the top, zero-extend them. The product then appears
in the low 16 or 32 bits. The smaller modules can also be instantiated directly.

After synthesis to coarse cells (one cell per adder or gate vector), the 32x32 top has about
2,200 cells and the 16x16 multiplier about 550. Measured on Xilinx Spartan-3 and Virtex-II
Pro parts, this structure takes about 23 ns (8x8), 43 ns (16x16) and 80 ns (32x32) on the
Spartan-3, and about half that on the Virtex-II Pro. These figures are quoted from the
published measurements of the method and were not reproduced here.

## Design choices and departures

These points go beyond the published block diagrams or depart from them:

* **Middle-to-upper carry.** The diagrams label the connection from the middle adder to the
  upper adder with only the upper half of the middle sum's width (for example bits 7–4 in
  the 8x8 stage). This design also carries the middle sum's carry bits on that connection,
  which a correct product needs (see above).
* **4x4 stage.** The 4x4 stage is described only as four 2x2 multipliers whose partial
  products are added. It is built here with exactly the same two-adder structure as the
  larger stages.
* **Adder widths.** Adder widths are stated for the 16x16 (16-bit) and 32x32 (32-bit)
  stages. The 8-bit and 4-bit adders of the smaller stages follow the same rule.
* **One adder module.** A single three-operand adder module serves as both the middle and
  the upper adder. The insides of the adders are not specified.
* **2x2 gates.** In the 2x2 leaf, AND gates for the bit products and half adders for the two
  "adder" boxes are this design's reading of the leaf's diagram.
* **Unsigned only.** Signed operands are not handled.
* **Example products.** The testbenches check the published example operands against
  products computed by true multiplication. Examples are 0xBA × 0xCA = 0x92C4,
  0xAB16 × 0x9124 = 0x60FF8518 and 0x12345678 × 0x00ABCDEF = 0x000C379AAA42D208.

The comparison designs that this multiplier is measured against are not included: a
shift-and-add multiplier and a Booth multiplier.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against products or
sums computed independently in the testbench. Each ends with a line
`TB_RESULT checks=N failures=M` and has a time-out watchdog.

| testbench                | stimulus |
|--------------------------|----------|
| `tb_half_adder`          | all 4 input pairs |
| `tb_vedic_2x2`           | all 16 operand pairs; requires the upper carry `s4` to occur |
| `tb_vedic_4x4`           | all 256 operand pairs |
| `tb_vedic_8x8`           | the published examples, then all 65,536 operand pairs |
| `tb_vedic_16x16`         | published examples, corners, all single-bit pairs, 200,000 random pairs |
| `tb_vedic_adder_circuit` | corners and 100,000 random triples at W = 32; both carry bits must occur |
| `tb_vedic_32x32`         | end to end at full size: published examples, corners, all 1,024 single-bit pairs, 50,000 each of 8-bit and 16-bit operands on the 32-bit datapath, and 300,000 random 32-bit pairs |

`tb_vedic_32x32` also counts how often each carry path is used and fails if one is never
used: the 2x2 upper half adder, and the middle adder's carry into the upper adder at the
4x4, 8x8, 16x16 and 32x32 levels. It runs in about a second.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic_32x32.sv --top-module tb_vedic_32x32
    ./obj_dir/Vtb_vedic_32x32

Replace `32x32` with any other module name to run its testbench. To lint a module:

    verilator --lint-only -Wall -Irtl rtl/vedic_32x32.sv

To build a wider multiplier, for example 64x64, copy `vedic_32x32.sv` and change three
things: the operand width, the sub-multiplier (`vedic_32x32`) and the port widths. The
adder circuit scales through its `W` parameter.
