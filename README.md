# Dadda multiplier: 8×8, 16×16 and 32×32

An unsigned binary multiplier built in three steps instead of the usual two.
A plain shift-and-add multiplier makes the partial products and then adds them
row by row, so its delay grows with the operand width. A Dadda multiplier puts
a **height-reduction tree** between the two steps. The tree is a network of
half and full adders with no carry chains. It squeezes the matrix of partial
products down to just two rows, and a single carry-propagate adder then adds
those two rows.

This RTL provides:

* an 8×8 Dadda multiplier written out adder by adder;
* 16×16 and 32×32 multipliers, each composed of four multipliers of half the
  width;
* a top, `dadda_multiplier`, that selects among the three by a parameter
  (default 32×32).

Everything is combinational. There is no clock and there are no registers.

## The three stages of the 8×8 multiplier

**Stage 1 – partial products.** `partial_product_gen` forms 64 AND gates,
`pp[i][j] = a[j] & b[i]`, each of weight 2^(i+j). Row *i* is `a` if `b[i]` is 1
and zero otherwise. Grouped by weight, the bits form 15 columns of heights
1, 2, …, 8, …, 2, 1.

**Stage 2 – height reduction** (`dadda_tree_8x8`). The allowed column heights
follow Dadda's sequence d₁ = 2, dⱼ₊₁ = ⌊1.5·dⱼ⌋, which gives 2, 3, 4, 6, 9, 13, …
Reduction starts at the largest member below the operand width, which is 6 for
8 bits. It then walks down the sequence: 6 → 4 → 3 → 2. Each stage follows one
rule:

* Visit the columns from least significant to most significant.
* Count a column's height as its bits plus the carries this stage has already
  pushed into it.
* If the height is over the target by one, place a half adder (this removes
  one bit).
* If it is over by more, place a full adder (this removes two bits).
* Repeat until the column fits.
* Sums stay in their column. Carries move one column up. Both feed the next
  stage.

Only the columns that are too tall get any hardware, which makes Dadda's tree
the one with the fewest adders among tree multipliers. For 8×8:

| stage | target height | full adders | half adders | outputs   |
|-------|---------------|-------------|-------------|-----------|
| 1     | 6             | 3           | 3           | `s1`,`c1` [5:0]  |
| 2     | 4             | 12          | 2           | `s2`,`c2` [13:0] |
| 3     | 3             | 9           | 1           | `s3`,`c3` [9:0]  |
| 4     | 2             | 11          | 1           | `s4`,`c4` [11:0] |

That is 35 full and 7 half adders in total. The adder outputs keep these
per-stage names in the RTL, indexed in the order the adders are placed.

Where several bits in a column could feed an adder, the choice does not change
the product. The RTL uses one fixed assignment:

* stages 1 and 2 take bits from the end of each column's list (in stage 1,
  the highest partial-product rows);
* stages 3 and 4 take them from the front;
* between stages, each column keeps this order: stage 1 passes on its
  untouched bits, then the carries from below, then its own sums; stage 2
  passes on the carries, then its sums, then the untouched bits; stages 3 and
  4 pass on the untouched bits, then the carries, then the sums.

This exact wiring gives the reference internal values listed under
"Worked example" below.

**Stage 3 – final addition.** After stage 2, column 0 holds the single bit
`pp[0][0]`, which is the product's LSB. Columns 1–14 hold two rows.
`ripple_carry_adder` adds them with one half adder and 13 full adders (sum
`s5`, carries `c5`), and its carry out is product bit 15.

The whole 8×8 multiplier is 64 AND gates + 42 reduction adders + 14 final-adder
cells = 120 cells.

### Worked example

For `a = 10101011` and `b = 01111001` the product is `0101000011010011`
(171 × 121 = 20691). The internal vectors, printed with index 0 leftmost, are:

| signal | value |
|--------|-------|
| s1 / c1 | 011111 / 100000 |
| s2 / c2 | 00010110011001 / 11000101000010 |
| s3 / c3 | 1010110001 / 0001001010 |
| s4 / c4 | 000001111101 / 010101000010 |
| c5      | 00000001111010 |

`tb_dadda_mult_8x8` checks every one of them.

## The wider multipliers

The 16×16 and 32×32 multipliers are **not** single Dadda trees over 256 or 1024
partial products. Each splits its operands into halves of H = N/2 bits and
forms four sub-products in parallel with smaller multipliers:

```
y11 = a_lo*b_lo   y12 = a_lo*b_hi   y21 = a_hi*b_lo   y22 = a_hi*b_hi   (N bits each)
a*b = y11 + (y12 + y21) << H + y22 << 2H
```

So `dadda_mult_16x16` holds four `dadda_mult_8x8`, and `dadda_mult_32x32`
holds four `dadda_mult_16x16` (sixteen 8×8 trees in all). `dadda_combine`
merges the four sub-products:

1. The low H product bits are simply `y11[H-1:0]`.
2. A **carry-save row** of N full adders (`carry_save_adder`) reduces
   `y11[N-1:H]`, `y12` and `y21` to a sum word `s_1` and a carry word `c_1`.
   No carry travels along this row.
3. A **ripple-carry adder** over product positions 1 … 3H−1 (relative to
   bit H) adds `s_1` and `c_1 << 1`. Position 0 holds only `s_1[0]`. Its
   per-position carries are `c_2`, 3H−1 bits wide (`c_2[22:0]` for 16×16,
   `c_2[46:0]` for 32×32). `c_2[k]` is the carry out of position k+1.
4. A second, N-bit ripple-carry adder adds `y22` at position H.

The upper 3H bits of the result cannot overflow, so both ripple adders' carry
outs are always 0 and are left unconnected.

Reference values that the testbenches check:

* 16×16: 117 × 23 gives y11 = 2691, `s_1` = `y11[15:8]` = 0x0A, c_1 = c_2 = 0.
* 32×32: 0x0003945B × 12058 = 2828650046 gives y11 = 0x1B4BC63E,
  y21 = 0x8D4E, `s_1` = 0x9605, `c_1` = 0x094A and `c_2` = 0x0B02.

## Module hierarchy and interfaces

```
dadda_multiplier #(N = 32)            a[N-1:0], b[N-1:0] -> y[2N-1:0]
└─ dadda_mult_32x32                   (N = 32; N = 16 / 8 pick the lower levels)
   ├─ dadda_mult_16x16 ×4
   │  ├─ dadda_mult_8x8 ×4
   │  │  ├─ partial_product_gen #(8)        64 AND
   │  │  ├─ dadda_tree_8x8                  42 half/full adders
   │  │  └─ ripple_carry_adder #(14)        final adder
   │  └─ dadda_combine #(16)
   └─ dadda_combine #(32)
      ├─ carry_save_adder #(N)              s_1, c_1
      ├─ ripple_carry_adder #(3N/2-1)       c_2
      └─ ripple_carry_adder #(N)            adds y22
```

Leaf cells are `half_adder` and `full_adder`. `dadda_pkg` holds the Dadda
height sequence as functions (`dadda_first_height`, `dadda_stages`). The 8×8
tree uses them to refuse elaboration if its hard-wired schedule ever stopped
matching the rule.

* `dadda_multiplier` takes `N` = 8, 16 or 32. Any other value stops
  elaboration with an error.
* `dadda_mult_16x16` and `dadda_mult_32x32` also output `s_1`, `c_1` and
  `c_2`, for observation.
* All operands and products are unsigned.
* Timing: the product is valid one combinational delay after the operands
  change. Register the inputs and outputs outside the multiplier if it is used
  in a clocked design.

## Design decisions and limits

These points are choices made in this RTL, not things the architecture fixes:

* **Unsigned only.** There is no sign handling (no Baugh–Wooley or Booth
  recoding).
* **No pipelining.** Nothing is registered.
* **Ripple-carry final adders.** These are the simplest adders that yield the
  per-position carry vectors `c5` and `c_2`. They are also the slowest part of
  the design. A prefix adder would be the obvious replacement if speed
  matters; the product stays the same, but `c5` and `c_2` would lose their
  meaning.
* **How `y22` is added.** The carry-save row and the `c_2` adder are as
  described above. Adding `y22` with a separate ripple adder after the `c_2`
  adder is this RTL's own choice.
* **Roles of `y12` and `y21`.** Taking `y12 = a_lo*b_hi` and
  `y21 = a_hi*b_lo` is a reading of the signal names. The two could be
  swapped without any effect.
* **Bit assignment in the tree.** Chosen so that the 8×8 internal values above
  come out exactly.
* **The wider multipliers are composed.** Because 16×16 and 32×32 are built
  from four smaller multipliers, their critical path includes the 8×8 trees'
  ripple adders plus one `dadda_combine` per level. A flat Dadda tree over all
  N² partial products would be shallower. That variant is not provided.
* **FPGA results not reproduced.** LUT count, occupied slices, power and delay
  of this architecture were reported elsewhere for an unnamed FPGA:

  | size  | LUTs | slices | power   | delay   |
  |-------|------|--------|---------|---------|
  | 8×8   | 675  | 1034   | 0.24 W  | 5.4 ns  |
  | 16×16 | 865  | 1124   | 1.23 W  | 6.96 ns |
  | 32×32 | 942  | 1236   | 1.867 W | 7.87 ns |

  These figures depend on the device and the tool flow, and were not
  reproduced here.

## Changing the tree

`dadda_tree_8x8.sv` is an explicit netlist. To build a tree of another size,
apply the rule from stage 2: targets d = (largest Dadda height below N), …, 3, 2;
per column, a half adder when one bit over and a full adder when more; carries
count toward the next column's height in the same stage. Then place the final
adder over columns 1 … 2N−2. `dadda_first_height(N)` and `dadda_stages(N)` in
`dadda_pkg` give the first target and the number of stages.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module's
outputs with results computed independently in the testbench, usually with
SystemVerilog's own `*` and `+`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog that fails the run if it
hangs.

| testbench | what it covers |
|-----------|----------------|
| `tb_half_adder`, `tb_full_adder` | exhaustive |
| `tb_partial_product_gen` | every pp bit for all 65 536 operand pairs |
| `tb_dadda_tree_8x8` | both rows sum to a·b for all 65 536 pairs |
| `tb_dadda_mult_8x8` | all 65 536 pairs plus the worked example's internal vectors |
| `tb_ripple_carry_adder` | corners, a carry through all 14 positions, 10 000 random, per-position carries |
| `tb_carry_save_adder` | sum, majority and s + 2c = x + y + z; the 32×32 example values |
| `tb_dadda_combine` | N = 16 and 32 with real sub-products; s_1, c_1, c_2 |
| `tb_dadda_mult_16x16`, `tb_dadda_mult_32x32` | the example of each size, corners, 40 000 random pairs |
| `tb_dadda_multiplier` | the top at its default 32×32 size, end to end |
| `tb_dadda_multiplier_sizes` | the top at N = 8 (exhaustive) and N = 16 |

`tb_dadda_multiplier` runs 8×8, 16×16 and 32×32 workloads (smaller operands
zero-extended), starting each with that size's example. It also counts how
often each datapath mechanism occurred and fails if any never did:

* a leaf tree's final carry out;
* a carry from the carry-save row;
* a ripple carry in `c_2`;
* a non-zero `y22`;
* a full 64-bit product.

Run any testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dadda_pkg.sv \
          tb/tb_dadda_multiplier.sv --top-module tb_dadda_multiplier -o sim
./obj_dir/sim
```

Each testbench finishes in about a second. Lint with
`verilator --lint-only -Wall rtl/*.sv --top-module dadda_multiplier`. The
remaining warnings are about outputs deliberately left open: the observation
ports `s_1`/`c_1`/`c_2` of inner instances, the carry vectors that are only
observed, and the always-zero carry outs described above.
