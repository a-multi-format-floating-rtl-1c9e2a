# Multi-format radix-16 floating-point multiplier

This is a pipelined multiplier that runs one of three operations through a
single 64 × 64 multiplier array:

| `frmt`      | operation                                   | results per cycle |
|-------------|---------------------------------------------|-------------------|
| `FMT_INT64` | 64 × 64 unsigned integer → 128-bit product  | 1                 |
| `FMT_FP64`  | IEEE 754 binary64 × binary64 → binary64     | 1                 |
| `FMT_FP32`  | two independent binary32 × binary32 products | 2                 |

The aim is energy per operation. A radix-16 recoding of the multiplier
operand gives 17 partial products instead of the 33 of radix-4 Booth. That
makes the reduction tree shallow and cheap, and it also makes it easy to
split the array into two independent lanes for binary32. When the
application can live with single precision, two binary32 products per cycle
cost less energy than one binary64 product. A small extra unit can also
return a binary64 result in binary32 form whenever that is exact, so that
later operations can run in the cheaper format.

The design follows the multi-format multiplier in A. Nannarelli, "A
Multi-Format Floating-Point Multiplier for Power-Efficient Operations". That
paper is cited below as "the paper". Where this RTL fills a gap or departs
from the paper, the section
[Where this RTL departs from or fills in the paper](#where-this-rtl-departs-from-or-fills-in-the-paper)
says so.

## Interface

```
mfmult (clk, rst_n, in_valid, frmt, reduce_en, a, b,
        out_valid, out_frmt, p_h, p_l, out_reduced)
```

| format | `a`        | `b`        | `p_h`                        | `p_l`            |
|--------|------------|------------|------------------------------|------------------|
| INT64  | X          | Y          | product[127:64]              | product[63:0]    |
| FP64   | binary64 X | binary64 Y | binary64 X·Y                 | 0                |
| FP64, `reduce_en`=1, result fits binary32 | binary64 X | binary64 Y | `{32'b0, binary32 X·Y}`, `out_reduced`=1 | 0 |
| FP32   | `{W, X}`   | `{Z, Y}`   | `{W·Z, X·Y}` (two binary32)  | 0                |

- **Timing.** An operation is issued by holding `in_valid` high at a rising
  clock edge. Its result appears with `out_valid` high after the third edge
  that follows, so latency is 3 cycles. A new operation can be issued on
  every cycle, and the format may change from one cycle to the next. There
  is no stall and no back-pressure. `rst_n` is a synchronous, active-low
  reset, and it clears only the valid bits.
- **Single binary32.** To issue one binary32 product, use `FMT_FP32` with
  zeros in the upper operand words and ignore `p_h[63:32]`. An idle lane
  that sees only zeros does not toggle.

## How one array serves three formats

### Radix-16 recoding and odd multiples (stage 1)

The multiplier Y is cut into 4-bit groups `Y_i`. Each group becomes one
digit in the set {-8 … 8}:

    d_i = Y_i − 16·Y[4i+3] + Y[4i−1]

The group's MSB is the transfer to the next digit, so the recoding has no
carry chain. A 64-bit Y gives 17 digits. The 17th digit is simply `Y[63]`
(`r16_recoder`).

Each digit selects a multiple of X, from 0 to 8X:

- 2X, 4X and 8X are shifts of X.
- 6X is a shift of 3X.
- The odd multiples 3X, 5X and 7X need real adders (`r16_odd_multiples`).
  These adders are the price of radix 16. They sit in a pipeline stage of
  their own, ahead of the array, so their delay does not add to the array's.

### Partial products and sign handling (stage 2)

In `r16_ppgen`, each partial product (PP) is built as follows:

- A mux picks the multiple of X given by the digit's magnitude.
- For a negative digit, an XOR row complements it. This gives the one's
  complement. The missing +1 goes into a separate *negation row* at the PP's
  least significant bit.
- Sign extension is not copied out to bit 127. Each PP carries its inverted
  sign bit just above its field, and one *constant row* holds the sum of the
  −2^k corrections of all PPs.

This gives 19 rows of 128 bits (17 PPs, the negation row and the constant
row). Their sum modulo 2^128 is X·Y.

`r16_csa_tree` reduces the 19 rows to a sum and a carry vector with 3:2
carry-save adders. The row count goes 19 → 13 → 9 → 6 → 4 → 3 → 2, which
is six full-adder delays.

### Dual binary32: sectioning the array

This is the least obvious part of the design. In FP32 mode the input
formatter places the 24-bit significands of X and Y at bit 0, and those of W
and Z at bit 32, with zero bits in between. Three things keep the two
products from mixing:

1. **Recoding.** The top group of each lane has a zero MSB, so no transfer
   digit crosses from the lower lane into the upper one. Digits 0–7 belong
   to Y and digits 8–16 belong to Z. The recoder does not need to know the
   format.
2. **Blanking in the PP generator.**
   - The lower-lane PPs (digits 0–7) take only bits 31:0 of the selected
     multiple. This is the multiple of X alone.
   - The upper-lane PPs (digits 8–16) take only bits 66:32. This is the
     multiple of W, and it is placed so that W·Z starts at bit 64.
   - The inverted-sign bits and the correction constant are worked out
     separately for each 64-bit half. The lower half of the array therefore
     sums, modulo 2^64, to X·Y, and the upper half sums to W·Z.
3. **Cutting the carries at bit 64.** The lower half's rows, taken as
   unsigned numbers, always add up to more than 2^64. Because of that, a
   carry out of column 63 must not reach column 64. In dual mode the tree
   drops the carry entering column 64 at every level, and so do the rounding
   adders.

So X·Y comes out in bits 47:0 and W·Z in bits 111:64. Each product then has
its own rounding, normalization and exponent path.

### Rounding and normalization without a second addition (stage 3)

The product of two normalized significands has its leading 1 in one of two
positions. For binary64 these are bits 105 and 104. Rounding first and then
normalizing would put two carry-propagate additions in series.
`mfm_norm_round` instead computes both rounded candidates at once:

    P1 = sum + carry + R1    (rounding as if the leading 1 is at the upper position)
    P0 = sum + carry + R0    (rounding as if it is one position lower)

R1 and R0 each hold a single 1 per lane, at the round bit of the matching
candidate. They are merged with the carry-save pair by a row of half adders.
Two adders then produce P1 and P0. The MSB of P1 picks the output: P1 as it
is, or P0 shifted left by one. The same bit tells the exponent path to add 1.

| format | leading 1 | R1 bit | R0 bit | significand taken from |
|--------|-----------|--------|--------|------------------------|
| FP64   | 105 / 104 | 52     | 51     | `pn[105:53]`           |
| FP32 W·Z | 111 / 110 | 87   | 86     | `pn[111:88]`           |
| FP32 X·Y | 47 / 46   | 23   | 22     | `pn[47:24]`            |
| INT64  | —         | —      | —      | `pn = P0` (R0 = 0, no shift) |

What this means for rounding:

- **Ties.** There is no sticky bit, so this is round-to-nearest with ties
  rounded away from zero, not ties-to-even.
- **Choice of position.** The position is chosen from P1, not from the
  unrounded product. A product whose upper 53 (or 24) bits are all ones,
  with a leading 1 at the lower position and a zero round bit, therefore
  rounds up to the next power of two instead of staying just below it.

Both effects are inherent in the scheme. Both are rare with random operands.

### Sign and exponent

- The product sign is the XOR of the operand signs.
- In stage 1, `mfm_exp_add` forms `E_X + E_Y − B`. Two of these adders
  exist:
  - an 11-bit adder shared by binary64 (B = 1023) and the upper binary32
    lane (B = 127, exponents zero-extended);
  - an 8-bit adder for the lower binary32 lane.
- Their results carry two extra bits, so they are 13 and 10 bits wide.
- In stage 3, `mfm_exp_select` has `E_P + 1` ready before the rounding adders
  finish, and picks `E_P` or `E_P + 1` with each lane's normalization bit.

### Binary64 → binary32 reduction

`b64_to_b32_reducer` decides whether a binary64 value is exactly a normal
binary32. Three checks must all pass:

- `E32 = E64 − 896` must be greater than 0. Since the 7 LSBs of 896 are
  zero, this needs only a 5-bit adder on `E64[10:7]`.
- `E64 − 1151 < 0`, i.e. `E32 ≤ 254`. This needs a 12-bit adder.
- The 29 LSBs of the fraction must be zero (an OR tree).

If all pass, the binary32 value is the sign, `E32[7:0]` and fraction bits
51:29. The output formatter uses the reducer on the FP64 result. When
`reduce_en` is set and the result fits, it sends the binary32 form to
`p_h[31:0]` and sets `out_reduced`.

## Pipeline

| stage | logic |
|-------|-------|
| 1 | `mfm_input_formatter`, `r16_recoder`, `r16_odd_multiples`, `mfm_exp_add` ×2 |
| 2 | `r16_ppgen`, `r16_csa_tree` |
| 3 | `mfm_norm_round`, `mfm_exp_select` ×2, `mfm_output_formatter` (with `b64_to_b32_reducer`) |

There are registers after each stage. Stage 1 registers the 17 digits, X and
the three odd multiples. Stage 2 registers the sum/carry pair. Stage 3 has the
output registers. The critical path is in stage 2 (PP generation plus the
tree). A data register loads only when its stage holds a valid operation, so
an idle pipeline does not toggle.

## Where this RTL departs from or fills in the paper

- **Binary64 rounding position.** One sentence of the paper puts R1/R0 at
  bits 53/52. Another rounds "by adding 1 in position 52" and truncates at
  bit 53. The binary32 vectors it gives (87/86, 23/22) also sit one bit
  below the truncation point. This RTL uses 52/51, which is the consistent
  reading.
- **7X.** The paper writes the third pre-computation adder as 8X + X. It is
  built here as 8X − X, which is the 7X that is needed.
- **Reduction exponent test.** The paper's algorithm asks for E32 > 0, while
  its hardware description tests only the sign of E32 (E32 ≥ 0). This RTL
  uses E32 > 0. E32 = 0 would encode a binary32 subnormal, which would not
  be exact.
- **Where the reducer sits.** The paper proposes putting the reduction into
  the multiplier, with its two short additions running in parallel with the
  exponent select. Here the reducer works on the packed, final binary64
  result, in series after the select. The function is the same, but the
  stage-3 path is longer. The `reduce_en` control is this design's addition.
- **Not handled, as in the paper:** zero, subnormal, infinite and NaN
  operands, exponent overflow and underflow, sticky-bit rounding and
  rounding modes. Zero- and subnormal-exponent operands get a hidden bit of
  0. The result exponent field is simply the low bits of the computed
  exponent. Test data in the testbenches stays inside the normal range.
- **Choices of this design:**
  - the lane order in the operand and result words (upper 32 bits = the W·Z
    lane);
  - zero on unused `p_l`;
  - the valid pipeline and its reset;
  - the negation-bit row;
  - 3:2 compressors only (the paper allows 3:2 or 4:2);
  - the exact dual-mode blanking and constants.
- **Not built:**
  - the 17-to-16 partial-product reduction of an earlier reference, which
    the paper cites but does not describe;
  - the radix-4 multiplier, which the paper uses only for comparison;
  - the power and timing results, which belong to the paper's 45 nm
    standard-cell implementation and cannot be reproduced from RTL.

## Files

`rtl/` (one module or package per file):

| file | role |
|------|------|
| `mfmult_pkg.sv` | format enum, widths, IEEE field sizes, digit type |
| `mfmult.sv` | top: three-stage pipeline |
| `mfm_input_formatter.sv` | operand routing and hidden bits |
| `r16_recoder.sv` | radix-16 recoding |
| `r16_odd_multiples.sv` | 3X, 5X, 7X |
| `r16_ppgen.sv` | partial products, sign-extension rows, lane blanking |
| `r16_csa_tree.sv` | 3:2 carry-save tree, sectionable at bit 64 |
| `mfm_norm_round.sv` | R1/R0 injection, twin adders, normalization mux |
| `mfm_exp_add.sv` | sign XOR, exponent sum |
| `mfm_exp_select.sv` | speculative exponent increment and select |
| `mfm_output_formatter.sv` | result packing and binary32 selection |
| `b64_to_b32_reducer.sv` | exact binary64 → binary32 check and conversion |

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_mfmult_formats.sv`. Each ends by printing
`TB_RESULT checks=N failures=M`. Expected values are computed without the
radix-16 datapath:

- SystemVerilog `*` for the integer products;
- `$realtobits($bitstoreal(a) * $bitstoreal(b))` for binary64;
- an exact 48-bit product, rounded in the testbench, for binary32.

The two top-level testbenches:

- **`tb_mfmult`** issues 4000 random operations of all formats. It mixes
  random idle cycles and format switches, and checks every result and its
  3-cycle latency. It also counts every mechanism: each format,
  single-lane binary32, reduction taken and refused, both normalization
  positions in each lane, back-to-back issue, format switches and idle
  cycles. If any of them never happens, the test fails.
- **`tb_mfmult_formats`** streams 1000 back-to-back operations of each
  format (int64, binary64, dual binary32, single binary32). It checks that
  each block finishes in 1000 + 2 cycles after the first issue.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mfmult_pkg.sv tb/tb_mfmult.sv --top-module tb_mfmult
./obj_dir/Vtb_mfmult
```

Replace `tb_mfmult` with any other testbench name to run it. Each testbench
finishes in well under a second.

## Changing it

- **Package constants.** The operand width, digit count and row count are
  constants in `mfmult_pkg`. The tree (`r16_csa_tree`) adapts to any row
  count.
- **Lane layout.** The dual-lane bit positions (24-bit significands at bits
  0/32, products at 0/64, R1/R0 positions) are written out in
  `mfm_input_formatter`, `r16_ppgen`, `mfm_norm_round` and
  `mfm_output_formatter`. Change them together.
- **Adding a sticky bit.** A sticky bit for ties-to-even would be the OR of
  the product bits below the round position. It would be computed from the
  carry-save pair in `mfm_norm_round`. On a tie (round bit set, sticky bit
  clear) the selected significand's LSB would then be cleared.
