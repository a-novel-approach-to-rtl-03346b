# Partitioned parallel decimal multiplier

A 16 x 16-digit decimal (BCD) multiplier can be built as one big array, but then
any operand change toggles logic across the whole array. This design instead
splits each operand into parts, multiplies every pair of parts in its own small
multiplier *cell*, and adds the aligned cell products. This is the
divide-and-conquer expansion behind Karatsuba's method, but it keeps all four
products and does not use the three-multiplication trick:

    X = X_H 10^n + X_L,   Y = Y_H 10^n + Y_L
    X*Y = 10^2n X_H Y_H + 10^n (X_H Y_L + X_L Y_H) + X_L Y_L

Applied recursively, the same identity gives 4, 16 or 64 cells for a 16-digit
operand. The aim is lower power: switching activity stays local to small
cells. The throughput is the same as one big multiplier, because everything is
combinational and one product is produced per evaluation.

The RTL has these units, all combinational, side by side in the top level
`pdm_top`:

| unit | what it is |
|---|---|
| `dec_mult_sym` | 16 x 16-digit BCD multiplier from equal C x C-digit cells. The top holds three instances: C = 8, 4 and 2 give 4, 16 and 64 cells (the 16-8, 16-4 and 16-2 arrangements). |
| `dec_mult_asym` | 16 x 16-digit BCD multiplier from cells of three shapes: 8x8, 8x4 / 4x8 and 4x4 ("16-8-4") |
| `mu16` | 16 x 16-bit **binary** multiplier from four 8x8 multipliers and three 16-bit ripple-carry adders |
| `cai_adder` | 32-bit compute-add-increment adder |

The binary `mu16` uses the same four-quarter structure with powers of two in
place of powers of ten. It is the binary counterpart of the 16-8 decimal
arrangement.

## Number format

Decimal operands are packed 8421 BCD. Digit `i` sits in bits `[4i+3:4i]`,
and digit 0 is the least significant. A 16-digit operand is 64 bits wide and
the 32-digit product is 128 bits wide. Inputs must be valid BCD, meaning every
nibble is 0..9. No unit checks this.

## How the cell products are aligned (the core of the design)

Take operands of N digits, split into K = N/C parts of C digits. The cell
product `P_ij = X_i * Y_j` has 2C digits and weight `10^((i+j)C)`. The products
on one anti-diagonal (same `i+j`) cover the same digit positions. Neighbouring
diagonals overlap by C digits. For N = 16, C = 8:

    digits   31........16 15.........8 7..........0
             [ X_H*Y_H   ][             X_L*Y_L    ]     row 0 (two products, no overlap)
                   [      X_H*Y_L        ]               row 1
                   [      X_L*Y_H        ]               row 2

This leads to three regions:

* **Low C digits (0..C-1).** Only `P_00` covers them, so they are wired
  straight to the output with no addition.
* **Middle digits (C .. 2N-C-1).** Up to 2K-1 products overlap here. They
  are packed into **2K-1 rows**, where each row holds products that do not
  overlap. A multi-operand decimal adder sums the rows. The number of rows is
  the adder's depth: 3, 7 and 15 for C = 8, 4 and 2.
* **Top C digits (2N-C .. 2N-1).** Only the upper half of `P_(K-1)(K-1)`
  covers them. The carry that leaves the middle sum is added into these digits
  by a decimal incrementer. This carry is a small decimal number, not a single
  bit: three 16-digit rows can carry 2, and fifteen rows can carry up to 14.
  The sum keeps two extra digits for it.

Row packing (`dec_mult_sym`, function `row_of`): two products on diagonals
whose `i+j` differ by 2 or more cannot overlap. So the products are split into
two groups by the parity of `i+j`. Within a group, product `P_ij` goes to row
`t`, its index along its diagonal. The group that holds diagonal K-1 uses K
rows and the other group uses K-1 rows, which gives 2K-1 rows in total. The
rows are built by shifting each cell product to its weight in a 2N-digit
vector and keeping the middle digits. Any packing gives the same sum; this one
only fixes the adder's size.

### Asymmetric 16-8-4 arrangement

`dec_mult_asym` cuts each operand into a high half and two low quarters:
`X = X_H 10^8 + X_LH 10^4 + X_LL`. This gives nine cells: one 8x8, two 8x4,
two 4x8 and four 4x4. The products fall into five rows (digit positions in
brackets):

    row 0: X_H*Y_LL [19..8]
    row 1: X_H*Y_LH [23..12]  X_LH*Y_LL [11..4]
    row 2: X_H*Y_H  [31..16]  X_LH*Y_LH [15..8]  X_LL*Y_LL [7..0]
    row 3: X_LH*Y_H [23..12]  X_LL*Y_LH [11..4]
    row 4: X_LL*Y_H [19..8]

Digits 0..3 pass through from `X_LL*Y_LL`. Digits 4..23 go through a 5-row
decimal adder. Digits 24..31 of `X_H*Y_H` receive that adder's carry. The
regions work the same way as in the symmetric case. Only the shapes differ.

## Building blocks

* **`dec_mult_cell #(NA, NB)`**: an NA x NB-digit BCD multiplier with a BCD
  result. Each digit pair is multiplied in binary (at most 81) and split into
  a tens digit and a units digit. For each multiplier digit, the units digits
  form one row and the tens digits form another row, one place higher. The
  2·NB rows are summed by `dec_multi_adder`. This is a deliberately simple
  cell. Faster published decimal multipliers precompute multiples of the
  multiplicand instead. The cell's ports allow a different algorithm to be
  swapped in.
* **`dec_multi_adder #(ROWS, DIGITS)`**: a linear chain of ROWS-1 BCD
  carry-propagate adders. The result is two digits wider than the operands.
  A carry-save (redundant) tree would be faster and would let the cells skip
  their own final carry propagation. That change would matter most for delay.
* **`bcd_adder #(DIGITS)`**: a digit-ripple BCD adder. Each digit is added
  in binary, and 6 is added when the digit sum exceeds 9. The same module is
  the top-digit incrementer, with the carry value as its second operand.
* **`m88 #(W)`**: an 8x8 binary multiplier. It has the same four-quarter
  structure as `mu16`, one level down: four 4x4 `urdhva_mult` blocks and
  three 8-bit ripple-carry adders, whose two middle carries are ORed.
* **`urdhva_mult #(W)`**: the 4x4 Vedic block, in vertical-and-crosswise
  (Urdhva) form. Output bit k is the LSB of column k's sum of bit products
  `a[i]&b[k-i]` plus the carry from column k-1.
* **`mu16`**: four `m88` instances give the byte products. Three 16-bit
  `rca` instances combine them:
  1. add `A_H*B_L + A_L*B_H`, giving sum `s1` and carry `c1`;
  2. add `s1 + (A_L*B_L)[15:8]`, giving `s2` and `c2`. `s2[7:0]` is product
     bits 15..8;
  3. add `A_H*B_H + {c1|c2, s2[15:8]}`, giving product bits 31..16.

  `c1` and `c2` both carry weight 2^24. They cannot both be set, because
  2·255·255 + 255 < 2^17, so the OR adds them exactly.
* **`rca #(W)`**: W full adders (`fa`) in a carry chain. The default is 32
  bits.
* **`cai_adder #(W, BLK)`**: the first BLK-bit RCA takes the real carry-in.
  Every other block adds with carry-in 0, so all blocks work at the same time.
  A half-adder increment circuit then adds the carry coming from the block
  below. A block's outgoing carry is its increment carry OR its own RCA carry.
  The two are never both 1, because an RCA carry leaves a temporary sum of at
  most 2^BLK - 2.

`pdm_pkg` holds the shared constants: the digit width, the default operand
length of 16 digits, and the two extra sum digits.

## Top-level ports (`pdm_top #(DIGITS = 16)`)

| port | dir | width | |
|---|---|---|---|
| `dx`, `dy` | in | 4·DIGITS | BCD operands, shared by all four decimal multipliers |
| `dp_16_8`, `dp_16_4`, `dp_16_2` | out | 8·DIGITS | products of the symmetric multipliers with DIGITS/2-, DIGITS/4- and DIGITS/8-digit cells |
| `dp_16_8_4` | out | 8·DIGITS | product of the asymmetric multiplier |
| `ba`, `bb` | in | 16 | binary operands of `mu16` |
| `bs` | out | 32 | binary product |
| `ca`, `cb`, `ccin` | in | 32, 32, 1 | CAI adder inputs |
| `csum`, `ccout` | out | 32, 1 | CAI adder sum and carry-out |

There is no clock, reset or handshake. Every output is a combinational
function of its inputs. To pipeline the design, register the inputs and
outputs around the unit of interest.

## Where this RTL departs from, or fills in, the original design

* **Cell algorithm, adder structures and row packing.** These are the simple
  choices described above. The original leaves them open. Only the
  partitioning and the three-region alignment are taken from it.
* **Non-redundant BCD everywhere.** Cells output BCD, as in the original's
  first arrangement. The redundant-input multi-operand adder it suggests as an
  improvement is not built.
* **Adders in `mu16` and `m88`.** These are ripple-carry. The earlier
  structure these multipliers are derived from used carry-select adders,
  which are not part of this RTL. The original's schematic of `mu16` shows
  ripple-carry adders.
* **Where the CAI adder is used.** The original does not say, so it is a
  separate unit. Its block carry is read as "increment carry OR this block's
  own RCA carry", the only reading that adds correctly.
* **Stand-alone units.** The units are not combined into one datapath,
  because no such combination is described.
* **No power, delay or area results are reproduced.** The published figures
  for the binary `mu16` come from an FPGA flow: about 0.37 W, 42 ns and 644
  LUTs. None of them is a property of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. References are computed independently: BCD
operands are converted to 128-bit binary (`tb/bcd_ref_pkg.sv`), multiplied
there, and converted back.

| testbench | coverage |
|---|---|
| `bcd_adder_tb` | 2,000+ random, sparse and all-nines cases with carry-in |
| `dec_multi_adder_tb` | 7 rows x 24 digits, 1,000 cases |
| `dec_mult_cell_tb` | 2x2 cell exhaustively (10^4 pairs); 8x4 cell on 1,000 cases |
| `dec_mult_sym_tb` | C = 8, 4, 2 side by side, 3,000 cases each; adder depths 3/7/15; counts non-zero incrementer carries |
| `dec_mult_asym_tb` | 3,000 cases; counts incrementer carries |
| `urdhva_mult_tb` | 4x4 exhaustively; an 8-bit instance on all 65,536 pairs |
| `m88_tb` | all 65,536 operand pairs; requires both middle carries to occur |
| `mu16_tb` | 20,000 cases; requires both `c1` and `c2` to occur |
| `rca_tb`, `cai_adder_tb` | 5,000 cases each. The CAI test requires both an increment-circuit overflow and a block's own carry to occur |
| `activity_tb` | all four decimal arrangements at default size: when only the low four digits change, every cell whose operand parts are constant must not toggle. It also reports cell-output toggle counts for low-digit and full-width operands |
| `pdm_top_tb` | whole design at default parameters, 2,000 cases on all six units at once. It counts every carry mechanism listed above and fails if one never occurs |

`activity_tb` demonstrates the point of partitioning. With operands whose
upper twelve digits stay zero, only the cell (or, for 2-digit cells, the four
cells) that sees the low digits switches. The rest of the array stays quiet.
The counts it prints cover cell outputs only, not the nodes inside the cells
or the adders. Treat them as an indication, not a power estimate. A real
comparison needs gate-level switching activity from a synthesised netlist.

Random operands come in four patterns: uniform digits, all nines, sparse
(mostly zero) and half-populated. Together they reach the long carry chains.

To simulate with Verilator, for example the top:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/pdm_pkg.sv tb/bcd_ref_pkg.sv tb/pdm_top_tb.sv --top-module pdm_top_tb
    ./obj_dir/Vpdm_top_tb

To test a block, use that block's testbench file and top module name instead.
`-I` lets Verilator find the other modules by file name. Every testbench runs
in well under a second.

## Changing it

* The cell size of a symmetric multiplier is `C` on `dec_mult_sym`. It must
  divide `N` and leave at least two parts. The top derives its three cell
  sizes from `DIGITS`, so `DIGITS` must be a multiple of 16 there (DIGITS/8 digits per cell, and the asymmetric split needs quarters).
* `DIGITS` must be a multiple of 4 for the asymmetric unit.
* The testbench reference handles products up to 32 digits. For longer
  operands, widen `wide_t` in `tb/bcd_ref_pkg.sv`.
* A new cell algorithm only has to keep the `dec_mult_cell` ports and return
  a BCD product.
