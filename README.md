# Reconfigurable multi-precision Booth multipliers (R4RC16, R4RC32)

Some CNN layers run well on 8-bit integers, while others need 16 or 32 bits
to keep their accuracy. An accelerator that keeps a separate multiplier for
each precision wastes area, and its widest multiplier sets the clock. This
RTL builds one exact signed multiplier that can be switched, cycle by cycle,
between two modes:

* **Default mode** (`mode_select = 1`) gives one signed N x N product. N is 16
  for R4RC16 and 32 for R4RC32.
* **Low-power mode** (`mode_select = 0`) gives N/8 independent signed 8 x 8
  products, one per byte lane. R4RC16 delivers 2 of them per evaluation and
  R4RC32 delivers 4. The compressor columns that an 8-bit product does not
  need are gated off, so they stop switching.

Both modes are exact. No approximation is used anywhere.

## The main idea: split the multiplier operand by bytes

A radix-4 (modified) Booth multiplier recodes the multiplier operand `b` into
digits in {-2, -1, 0, +1, +2}. Digit i comes from the three bits
`b[2i+1], b[2i], b[2i-1]`. The digits of one byte therefore need one bit from
the byte below. Call that bit the overlap bit.

The full multiplier cuts `b` into 9-bit slices. Slice j is `b[8j+7 : 8j-1]`,
and the lowest slice is `{b[7:0], 1'b0}`. Each slice feeds its own internal
8 x N Booth multiplier (`booth_mult_8xn`), and every internal multiplier sees
all of the multiplicand `a`. The Booth value of slice j is

    B_j = signed(b[8j+7:8j]) + b[8j-1]        (b[-1] = 0)

and the sum over j of `B_j * 2^(8j)` is exactly `signed(b)`. So the
accumulator only has to add the slice products `P_j = a * B_j`, each shifted
left by 8j bits:

    R4RC16:  prod = P1 * 2^8  + P0
    R4RC32:  prod = P3 * 2^24 + P2 * 2^16 + P1 * 2^8 + P0

Each `P_j` is N+8 bits wide: 24 bits for R4RC16 and 40 bits for R4RC32.

## Low-power mode inside an 8 x N multiplier

Every internal multiplier is built as one 8-bit lane. In low-power mode,
internal multiplier j changes in three ways:

1. **Multiplicand.** It takes only its own byte lane `a[8j+7:8j]`,
   sign-extended, instead of all of `a`. The parameter `A_LP_LSB` sets which
   lane.
2. **Overlap bit.** The overlap bit `ib[0]` is forced to 0. The slice then
   encodes just `signed(b[8j+7:8j])`, and the lane does not depend on its
   neighbour.
3. **Columns.** The reconfigurable 4-2 compressors of columns 16 and up are
   disabled. Their inputs are AND-gated to 0, so these columns produce 0 and
   do not toggle.

Step 3 keeps the result exact for this reason: the partial-product rows are
two's-complement numbers, so the sum of the low 16 columns is the product
modulo 2^16. A signed 8 x 8 product always fits in 16 bits, so `p[15:0]` is
exact. The output control passes `p[15:0]` to lane output j and drives the
full-width output to 0. In default mode it does the opposite: the lane
outputs are 0.

## Datapath of one 8 x N Booth multiplier

```
ib[8:0] --> 4 x booth_r4_encoder --> digits {neg,two,one}
                                          |
ia (or lane) ------------------> 4 x booth_pp_decoder --> rows pp0..pp3 (N+1 bits)
                                          |
            rows placed at columns 0,2,4,6, sign-extended to N+8 columns;
            the +1 of rows 0..2 fills the empty low column of the row above
                                          |
            N+8 x rc_compressor42 (cout -> next column's cin, en per column)
                                          |
            sum + (carry << 1) + (+1 of row 3 at column 6)  --> p[N+7:0]
```

* `booth_r4_encoder` recodes the digits: `one = b0 ^ b-1`,
  `two = b1 ? ~b0 & ~b-1 : b0 & b-1`, and `neg = b1 & ~(b0 & b-1)`. Here b1,
  b0 and b-1 are `b[2i+1]`, `b[2i]` and `b[2i-1]`. Group `111` is a plain
  zero, never a negated zero.
* `booth_pp_decoder` selects `a`, `2a` or 0 and inverts the row when the
  digit is negative. The +1 that completes the negation leaves on `neg`.
* `rc_compressor42` is a multiplexer-based 4-2 compressor: `cout = (x0^x1) ? x2 : x0`,
  `sum = x0^x1^x2^x3^cin`, and `carry = (x0^x1^x2^x3) ? cin : x3`. An `en`
  input gates all five of its inputs. `cout` does not depend on `cin`, so a
  row of compressors has no ripple.
* The final carry-propagate adder is a plain `+`, left for synthesis to map.
  The carries out of the top column are dropped. The product never needs
  them, because `|a * B| <= 2^(N+6)`.

## Files

| File | Contents |
|---|---|
| `rtl/r4rc_pkg.sv` | `booth_digit_t`, `MODE_DEFAULT` / `MODE_LOW_POWER`, lane widths |
| `rtl/booth_r4_encoder.sv` | radix-4 Booth recoder for one digit |
| `rtl/booth_pp_decoder.sv` | partial-product row decoder, parameter `N` |
| `rtl/rc_compressor42.sv` | reconfigurable (gated) 4-2 compressor |
| `rtl/booth_mult_8xn.sv` | reconfigurable 8 x N Booth multiplier, parameters `N`, `A_LP_LSB` |
| `rtl/acc_out_ctrl.sv` | accumulator and output control, parameter `N` |
| `rtl/r4rc_mult.sv` | R4RCn: N/8 internal multipliers + output control, `N = 16` by default |
| `rtl/r4rc_top.sv` | R4RC16 and R4RC32 side by side, each with its own ports |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_resnet_tile` |

## Interface and timing

`r4rc_mult #(.N(N))` has these ports:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `in_a`, `in_b` | in | N | two's-complement operands |
| `mode_select` | in | 1 | 1 = default (N-bit), 0 = low-power (8-bit lanes) |
| `prod` | out | 2N | `signed(in_a) * signed(in_b)` in default mode, else 0 |
| `lp_prod[j]` | out | N/8 x 16 | `signed(in_a[8j+7:8j]) * signed(in_b[8j+7:8j])` in low-power mode, else 0 |

The lanes are numbered from the least significant byte. All blocks are
purely combinational, with no clock, reset or pipeline registers. The mode
can change with every new operand pair. `r4rc_top` only brings out both
instances, with ports `a16`, `b16`, `mode16`, `prod16`, `lp16` and `a32`,
`b32`, `mode32`, `prod32`, `lp32`.

## Using it in a CNN

The intended use is precision scheduling per layer. For ResNet-18, the early
layers (1-6) tolerate 8-bit arithmetic and run in low-power mode. The middle
and final layers (7-17) run in default mode. That means two mode switches per
inference: one from low-power to default at layer 7, and one from default
back to low-power at the start of the next image. No scheduler is included;
whatever drives `mode_select` decides the mode. In low-power mode a 32-term
dot product takes 16 evaluations on R4RC16 and 8 on R4RC32. In default mode
it takes 32.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. For example:

```
verilator --binary --timing --assert -y rtl rtl/r4rc_pkg.sv tb/tb_r4rc_top.sv \
          --top-module tb_r4rc_top -o sim && ./obj_dir/sim
```

`-y rtl` lets verilator find each module in `rtl/<module>.sv`. The package
must be named first, because it is imported rather than instantiated.

* `tb_booth_r4_encoder` and `tb_rc_compressor42` are exhaustive.
* `tb_booth_pp_decoder`, `tb_booth_mult_8xn`, `tb_acc_out_ctrl` and
  `tb_r4rc_mult` test corner values (0, -1, the most negative and the most
  positive operands) plus random vectors. Each runs at N = 16 and at N = 32.
  Expected values are computed in the testbench with plain integer
  multiplication.
* `tb_r4rc_top` runs the ResNet-18 precision schedule twice over both
  multipliers at their default sizes, with 17 layers and 32-term dot
  products per layer. It checks:
  * every dot product;
  * the cycle count per layer, i.e. 2 or 4 products per low-power evaluation;
  * that both mode switches, both modes on both multipliers and the
    most-negative operand pairs all occurred.

* `tb_resnet_tile` runs the same schedule as a real chain of layers. It
  uses 17 layers of 3x3 convolution on a 4x4 tile with 4 channels, and two
  images on each multiplier. Low-power layers pack the input channels into
  the byte lanes: 2 on R4RC16 and 4 on R4RC32. Each layer's sums are shifted
  and saturated to 8, 16 or 32 bits and fed to the next layer. Every output of
  every layer is compared with a reference convolution, and the number of
  evaluations per layer is checked.

Each testbench runs in under a second.

## Where this design makes its own choices

The published design gives the two-level structure, the operand slicing,
the per-mode products, the widths of `P` (24 and 40 bits) and the output
names. The following are choices of this RTL:

* **Low-power cell changes.** This RTL does not copy the original
  partial-product array's cell-by-cell changes for low-power mode. Forcing
  the overlap bit to 0, selecting the multiplicand lane and gating columns
  16 and up are this design's own way of getting an exact 8 x 8 product.
* **Compressor gates.** The gate-level form of the original reconfigurable
  compressor is not reproduced. A standard multiplexer-based 4-2 compressor
  with AND input gating stands in for it. The power figures of the original
  design therefore do not carry over to this RTL.
* **Sign extension and final adder.** The rows are fully sign-extended
  instead of using the constant sign-extension trick, and the final adder is
  an inferred `+`. Both are simple, not optimised.
* **Output widths.** The lane outputs are labelled "8-bit" in the original
  block diagrams. Here they are 16 bits wide, because an exact 8 x 8 product
  needs 16 bits. Unused outputs are driven to 0 in each mode.
* **Operands and mode polarity.** The low-power products are signed, like the
  full-width product. `mode_select = 1` is the full-width mode.
* **Slice wiring.** The text of the original description gives two of the
  R4RC32 slices as 8-bit, but their block diagram draws them 9 bits wide
  (`inB[23:15]`, `inB[15:7]`). The 9-bit wiring is used here. It is the one
  that gives an exact 32 x 32 product.
* **No registers.** The "accumulator" adds the shifted slice products within
  one evaluation. It does not accumulate across cycles, and no registers are
  added.

The timing, area and power figures reported for the original 65 nm
implementation were not reproduced.
