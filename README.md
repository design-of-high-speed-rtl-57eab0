# Approximate Wallace multipliers with AND-OR compression and inexact 3:2 compressors

Many signal-processing and image workloads can tolerate a slightly wrong
product in exchange for a smaller and faster multiplier. This design makes an
8 × 8-bit unsigned multiplier cheaper by approximating at two points of the
usual three-step multiplier (partial product generation, partial product
reduction, final addition):

1. **Lossy compression of the partial products.** Each pair of adjacent
   partial-product rows is merged into one row by OR gates. 1 + 1 becomes 1
   instead of 10, so a carry is lost wherever both bits are set. This halves
   the number of rows before any adder is spent on them (8 rows become 4).
2. **Inexact adder cells.** The Wallace tree and the final adder are built
   from a half adder whose sum is `a | b` instead of `a ^ b`, and from one of
   four simplified 3:2 compressors (full adders). Each compressor drops part
   of the carry or sum logic.

The four compressor designs give four multipliers, **AWM1 … AWM4**
(Approximate Wallace Multiplier). The top level, `awm_top`, places all four
side by side on the same operands. Everything is combinational: no clock, no
registers, and a product is valid one gate delay after the operands.

## Datapath

```
 a[7:0] ─┐
         ├─ awm_ppg ──► 8 rows ── awm_andor_compress ──► 4 rows ── awm_wallace_tree ──► 2 rows ── awm_final_adder ──► p[15:0]
 b[7:0] ─┘   (64 AND)             (OR per overlapping column)       (2 stages of 3:2)             (ripple, inexact cells)
```

### Partial products (`awm_ppg`)
Row *i* is `a & {8{b[i]}}`. Bit *j* of row *i* has weight *i + j*.

### AND-OR compression (`awm_andor_compress`)
Rows 2k and 2k+1 are paired. Row 2k+1 sits one weight above row 2k, so the two
overlap in N−1 columns. Each overlapping column gets one OR gate, and the two
end bits pass through. Compressed row k covers weights 2k … 2k+N:

```
weight      15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
row 0                                x  x  x  x  x  x  x  x  x      (pp0 | pp1<<1)
row 1                          x  x  x  x  x  x  x  x  x            (pp2<<2 | pp3<<3)
row 2                    x  x  x  x  x  x  x  x  x                  ...
row 3              x  x  x  x  x  x  x  x  x
```

The error is always downward: the compressed value is never above the true
product. For example, 50·50 = 2500 compresses to 1988, and 140·140 = 19600 to
19568. Only operand bits that land in both rows of a pair cause a loss.

### Wallace reduction (`awm_wallace_tree`)
Classic row-grouped Wallace reduction. Each stage takes the rows three at a
time. In each column a group reduces its bits as follows:

- three bits go into a 3:2 compressor, with row 3j on input `a`, row 3j+1 on
  `b` and row 3j+2 on `ci`;
- two bits go into a half adder;
- a single bit passes through.

Each group leaves a sum row and a carry row one weight higher. Rows left over
from the grouping pass to the next stage. For 8 bits this takes two stages,
4 → 3 → 2 rows: rows 0–2 are reduced while row 3 waits, then the three
resulting rows are reduced.

Which columns hold how many bits depends only on N. The package `awm_pkg`
works this out at elaboration time (`row_mask`, `stage_rows`), so cells are
placed only where a column really has two or three bits. The same code
therefore builds the tree for any N up to 32.

### Final addition (`awm_final_adder`)
This is a ripple-carry adder over the two remaining rows, built from the same
cells as the tree. In each column the two row bits go to `a` and `b` and the
incoming carry goes to `ci`. Columns with only two inputs use the half adder.
Any carry out of bit 15 is dropped.

## The adder cells

All cells have inputs `a, b, ci` and outputs `s, co`. The table lists where
each one differs from an exact full adder.

| cell | sum | carry | wrong for `{a,b,ci}` | used by |
|---|---|---|---|---|
| exact full adder (`compressor32`, `FA_EXACT`) | a^b^ci | ab + (a^b)ci | – | reference only |
| design 1 (`compressor32_d1`) | a^b^ci | ab + ci | 001: carry 1 | AWM1 |
| design 2 (`compressor32_d2`) | a^b^ci | (a^b)·ci | 110, 111: carry 0 | AWM2 |
| design 3 (`compressor32_d3`) | (a\|b)^ci | (a\|b)·ci | 110: sum 1, carry 0; 111: sum 0 | AWM3 |
| design 4 (`compressor32_d4`) | a^b^ci | a | 011: carry 0; 100: carry 1 | AWM4 |
| inexact half adder (`inexact_half_adder`) | a\|b | ab | 11: sum 1 | all AWMs |

How the approximations affect speed and accuracy:

- **Design 4** takes its carry straight from `a`. In the ripple adder no carry
  propagates at all, which is where its speed comes from.
- **Design 1** forces a carry whenever `ci` is 1. In a ripple chain, a carry
  that starts at a column with two set inputs therefore stays set up to the
  top of the product. This makes AWM1 the least accurate of the four in
  simulation.
- **The inexact half adder** can only raise a result. Designs 1 and 4 can
  raise the carry as well. This is why several AWMs read 65535 for 255·255.

`compressor32` wraps the five cells behind one `DESIGN` parameter
(`awm_pkg::fa_design_e`). `half_adder_cell` likewise switches between the
inexact half adder and an exact one (`INEXACT`).

## Behaviour in simulation

The numbers below come from `tb_awm_top`, which tries all 65536 operand pairs.
Each AWM is compared with the exact product `a*b`:

| | error rate | mean error distance | max error |
|---|---|---|---|
| AWM1 | 93.9 % | 14580 | 48384 |
| AWM2 | 83.8 % | 5298 | 45642 |
| AWM3 | 83.9 % | 3317 | 32290 |
| AWM4 | 97.6 % | 6496 | 38144 |

Example products:

| a·b | exact | AWM1 | AWM2 | AWM3 | AWM4 |
|---|---|---|---|---|---|
| 4·4 | 16 | 16 | 16 | 16 | 16 |
| 50·50 | 2500 | 31172 | 1988 | 1988 | 1604 |
| 140·140 | 19600 | 19568 | 19568 | 19568 | 19504 |
| 255·255 | 65025 | 65535 | 23487 | 32735 | 65535 |

The errors are large. This design aims at area and delay, not accuracy. The
original evaluation of this architecture on an FPGA reported the following
savings against a conventional 104-LUT, 16.7 ns multiplier:

| | area reduction | delay reduction |
|---|---|---|
| AWM1 | 36 % | 35 % |
| AWM2 | 48 % | 37 % |
| AWM3 | 48 % | 47 % |
| AWM4 | 54 % | 56 % |

Those figures were not re-measured for this RTL.

## Where this RTL makes its own choices

The architecture above is fixed: AND array, OR compression of row pairs,
Wallace reduction, and inexact half adder plus one compressor design per
multiplier. The following details are choices of this implementation:

- **Row pairing.** Compression pairs *adjacent* rows and ORs every
  overlapping column. This reading reproduces the reported compressed products
  (1988 for 50·50, 19568 for 140·140). The original description also hints
  that more significant bits are treated more accurately, but it gives no rule
  for that, so every pair is fully compressed.
- **Tree wiring and input order.** The tree is a row-grouped Wallace tree, and
  the final adder is a ripple adder. The inputs of the asymmetric cells are
  wired as described above. These details change the AWM results, and the
  original sources do not fix them. This RTL therefore matches the reported
  example products for the exact-cell configuration, for AWM2 (1988, 19568)
  and for 255·255 on AWM1 and AWM4 (65535). It does not match the reported
  AWM1 and AWM4 products for 50·50 and 140·140.
- **Where the inexact cells go.** They are used everywhere: in every tree cell
  and in every final-adder cell.
- **Output width.** The product is 2N bits, and any carry beyond it is
  dropped. With exact cells that carry is always zero.
- **Signedness.** Operands are unsigned.
- **Timing.** The design is purely combinational.

The configuration `DESIGN = FA_EXACT, HA_INEXACT = 0` of `awm_multiplier`
keeps only the compression error. It is included as a reference point and is
not one of the four proposed multipliers.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `awm_top` | `N` | 8 | operand width (product is 2N) |
| `awm_multiplier` | `N` | 8 | operand width, 2 … 32 |
| | `DESIGN` | `FA_D4` | compressor: `FA_D1`…`FA_D4` (AWM1…AWM4) or `FA_EXACT` |
| | `HA_INEXACT` | 1 | 1: OR-sum half adder; 0: exact half adder |
| `awm_wallace_tree`, `awm_final_adder` | same as above | | `awm_final_adder` also takes occupancy masks `MASK0/MASK1`; all ones by default, which makes it a plain 2N-bit adder |

## Files

- `rtl/awm_pkg.sv` holds the cell-design enum and the elaboration-time
  occupancy functions.
- `rtl/awm_top.sv` is the top level with AWM1…AWM4.
- `rtl/awm_multiplier.sv` is one multiplier.
- `rtl/awm_ppg.sv`, `rtl/awm_andor_compress.sv`, `rtl/awm_wallace_tree.sv`
  and `rtl/awm_final_adder.sv` are the four stages.
- `rtl/compressor32.sv`, `rtl/compressor32_d1.sv` … `rtl/compressor32_d4.sv`,
  `rtl/half_adder_cell.sv` and `rtl/inexact_half_adder.sv` are the cells.
- `tb/awm_ref_pkg.sv` is a bit-level reference model for the testbenches. Its
  cells are given by truth tables rather than equations. It also counts how
  often each approximation fires.
- `tb/tb_<module>.sv` is one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Verification

- **Cells.** Each cell testbench checks all input combinations against its
  truth table.
- **`tb_awm_multiplier`.** Checks all 65536 operand pairs for AWM1…AWM4 and
  the exact-cell configuration against the reference model. The exact-cell
  configuration is also checked against the arithmetic sum of the compressed
  rows. The reported example products listed above are checked explicitly.
  N = 7 and N = 16 get random checks.
- **`tb_awm_wallace_tree` and `tb_awm_final_adder`.** Compare against the
  reference model, and against exact sums when exact cells are selected.
- **`tb_awm_top`.** The end-to-end test at the default size. It also fails if
  any approximation mechanism never fires: an OR-compression loss, a 1+1
  half-adder case, or an inexact input case of each compressor.

The reference model and the RTL were written separately. However, the model
follows the same structural choices (row grouping and input order). It
therefore confirms that the RTL implements those choices; it does not confirm
that those choices are the original ones.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/awm_pkg.sv tb/awm_ref_pkg.sv tb/tb_awm_top.sv --top-module tb_awm_top
./obj_dir/Vtb_awm_top
```

Each testbench runs in a few seconds at most. Verilator's lint reports that
the dropped top carry bits are unused (`UNUSEDSIGNAL`); this is intended.
