# Accuracy-controllable approximate 8x8 multiplier

Many image, signal and learning workloads can tolerate small errors in their
products. They still pay for exact multipliers, whose power goes mostly into
partial-product reduction and whose delay goes mostly into the final carry
chain. This multiplier makes both parts cheaper:

* **Reduction.** The partial products are compressed mainly with AND/OR
  cells instead of full adders.
* **Final adder.** The carry chain can be cut at run time. A 3-bit input `k`
  sets how many bits of the final adder propagate carries, from 7 (most
  accurate) down to 0 (shortest carry path). The same hardware can therefore
  serve program phases with different accuracy needs.

The RTL is a combinational 8x8 unsigned multiplier with a 16-bit product. It
has no clock, no reset and no handshake: `product` follows `a`, `b` and `k`
after the logic delay. It follows a published design ("A Low-Power
High-Speed Accuracy-Controllable Approximate Multiplier Design"), including
its column-by-column reduction map. The points where this RTL makes its own
choices are listed near the end.

## The two building blocks

### Incomplete adder cell and the approximate tree compressor

An incomplete adder cell (iCAC) takes two bits of equal weight and outputs
`p = a | b` and `q = a & b`. Both outputs keep the weight of the inputs. For
single bits `a + b == p + q` holds, so for a row of cells
`A + B == P + Q` with `P = A | B` and `Q = A & B`. On its own the cell is
exact: `P` is an approximate sum and `Q` is the error-recovery vector that
corrects it. For example, with `A = 01011111` and `B = 00110110`, a row gives
`P = 01111111` and `Q = 00010110`, and `P + Q = 10010101 = A + B`.

The approximation is added by the **approximate tree compressor (ATC-N)**:

1. Its N input words are paired, and each pair goes through a row of iCACs.
2. This gives N/2 approximate sums `P`.
3. The N/2 recovery vectors `Q` are not added exactly. They are ORed column
   by column into one **accuracy-compensation vector** `V`.

N words thus become N/2 + 1 words. The result is exact unless two recovery
vectors have a 1 in the same column. Whenever that happens, the OR drops
value, so the result can only be too small.

### Carry-maskable adder (CMA)

A ripple adder is built from one carry-maskable half adder (bit 0) and
carry-maskable full adders (bits 1 and up). Each cell has an active-low
`mask_x` input:

* **`mask_x = 1`:** the cell is an exact half adder or full adder.
* **`mask_x = 0`:** the cell generates no carry. Its sum becomes `x | y`.

The mask is a thermometer code: the upper `k` bits are unmasked and the
lower `7-k` bits are masked. So the masked cells always sit at the bottom,
fed by a masked half adder, and their carry in is always 0. The adder is then
a `k`-bit carry-propagate adder on top of `7-k` OR gates. Its longest carry
path is `k` cells.

A masked full adder may still receive a carry in of 1 if it is driven
outside this multiplier. In that case it only propagates the carry:
`s = (x|y) ^ cin` and `cout = (x|y) & cin`. This case never arises inside
the multiplier.

## The reduction map

Partial products occupy columns 0..14. Row `i` is `a & {8{b[i]}}` shifted
left by `i`. The stages are listed below.

| Stage | Unit | What it does | Rows after |
|---|---|---|---|
| 1 | ATC-8 | Pairs rows (0,1) (2,3) (4,5) (6,7) and gives P1..P4 (columns 0..8, 2..10, 4..12, 6..14) and V1 (columns 1..13). In each pair only the 7 overlapping columns need real cells; the other bits pass through. | |
| 1 | ATC-4 | Pairs (P1,P2) and (P3,P4) and gives P5 (0..10), P6 (4..14) and V2 (2..12). | |
| 1 | iCAC row | Turns P5, P6 into P7 (0..14) and Q7 (4..10). | 4: P7, Q7, V1, V2 |
| 2 | 7 OR gates | Computes `V1 \| V2` on columns 4..10, the only columns that hold four bits. | 3 |
| 3 | Half adders on columns 1 and 13, full adders on 2..12 | Exact carry-save step. It leaves a sum row (0..14) and a carry row (2..14). | 2 |
| 4 | Final adder | See below. | product |

Stage 4 splits the 13-column final addition into three parts:

* **Truncated part, columns 0..4.**
  * Columns 0 and 1 hold a single bit and pass through.
  * Columns 2..4 are one OR gate each.
  * This part never carries out.
* **Accuracy-controllable part, columns 5..11.** This is the 7-bit CMA,
  controlled by `k`. There is no carry in.
* **Accurate part, columns 12..14.** An exact 3-bit ripple adder is fed by
  the CMA's carry out. Its carry out is product bit 15.

Because masked CMA bits never carry, the unmasked CMA bits and the accurate
part together act as one exact adder starting at column `12-k`. With `S` and
`C` the stage-3 rows, the whole stage is:

```
product = S[1:0] | (S|C)[11-k:2] | ((S >> (12-k)) + (C >> (12-k))) << (12-k)
```

## Accuracy

The OR merges in stages 1, 2 and 4 can only lose value. So
`product <= a*b` for every input. The result is approximate even at `k = 7`,
where all loss comes from the OR merges in stages 1 and 2 and the truncated
part.

Over all 65,536 operand pairs the mean error `a*b - product` is:

| k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| mean error | 1069.3 | 681.3 | 464.5 | 319.6 | 230.2 | 187.5 | 170.5 | 164.5 |
| exact results (of 65,536) | 13092 | 14350 | 16432 | 19915 | 25525 | 31412 | 37053 | 41835 |

Examples:

* `255 x 255` gives 57309 at `k = 7` and 53245 at `k = 0`. The exact value is
  65025.
* `100 x 100` gives 10000 at every `k`.

## Files

All files are in `rtl/` and `tb/`, one module or package per file.

| Module | Role |
|---|---|
| `acam_pkg` | Column map constants: stage-2 OR window, stage-3 adder columns, stage-4 parts, width of `k`. |
| `acam_mult8` | Top: `a[7:0]`, `b[7:0]`, `k[2:0]` in, `product[15:0]` out. |
| `pp_gen` | AND-array partial products, column-aligned. |
| `icac_row` | Row of W incomplete adder cells (default W = 8). |
| `atc` | ATC-N (default N = 8, W = 8). The top uses N = 8 and N = 4 with W = 15. |
| `stage2_merge` | The seven OR gates and the packing into three rows. |
| `stage3_csa` | Half-adder and full-adder carry-save row. |
| `cm_half_adder`, `cm_full_adder` | Carry-maskable cells. |
| `cma` | W-bit carry-maskable adder (default W = 7). |
| `mask_decoder` | Turns `k` into the thermometer mask (upper `k` bits set). |
| `final_adder` | Stage 4: truncated part, CMA and accurate part. |

Inside the multiplier, every iCAC row and every ATC works on full 15-bit,
column-aligned words, with zeros where a row has no partial product. Cells
with a constant-zero input reduce to wires in synthesis. What remains is the
seven cells per pair that the reduction map needs.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It ends by
printing `TB_RESULT checks=N failures=M`, and a watchdog stops it if it
hangs. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/acam_pkg.sv tb/tb_acam_mult8.sv \
          --top-module tb_acam_mult8 -o sim && ./obj_dir/sim
```

Replace `acam_mult8` with any other module name to run that module's
testbench. Add `--assert` to enable the immediate assertions in
`acam_mult8`. They check three invariants of the tree that the later stages
rely on: Q7 lies only on columns 4..10, the middle row is empty at the
half-adder columns, and no carry reaches columns 0 and 1.

`tb_acam_mult8` applies all 524,288 combinations of `a`, `b` and `k` and
takes under a second. It checks each result bit-exactly against an
integer-level reference model built on the formula above. It also checks:

* `product <= a*b` for every input;
* zero operands give zero;
* the summed error for each `k` matches the table above, and it does not
  grow as `k` rises;
* switching `k` while the operands are held changes the product as
  expected.

It also counts how often each approximation actually changed a result: the
ATC-8 and ATC-4 OR merges, the stage-2 OR, the truncated part and carry
masking. It counts CMA carries into the accurate part too. Any of these that
never occurs is reported as a failure.

The block testbenches are exhaustive wherever the input space allows
(`pp_gen`, `icac_row`, the carry-maskable cells, `cma`, `mask_decoder`) and
random otherwise.

## Where this RTL makes its own choices

* **Accuracy input.** The published design drives seven `mask_x` signals
  directly. Here a binary `k` (0..7) is decoded into them. To drive arbitrary
  masks, bypass `mask_decoder` and feed `final_adder` directly. Masks that
  are not thermometer codes are outside the intended use.
* **Carry-maskable cells.** Only their behaviour is specified: exact when
  unmasked, OR with no carry when masked. The Boolean forms are this
  design's own, and so is the masked full adder's behaviour with a carry in
  of 1.
* **Product bit 15.** It is the carry out of the accurate part. It is needed
  because `255 x 255` exceeds 15 bits.
* **Row packing after stage 2.** Which leftover bits of V1 and V2 go into
  which of the three rows is chosen here. Any packing gives the same column
  sums.
* **Operands.** They are unsigned, and the multiplier is fixed at 8 bits.
  The published design gives its reduction map only for 8 bits. A wider
  version needs a new column map in `acam_pkg` and a new top, not just a
  parameter change.
* **Not reproduced.** One published simulation waveform shows `100 x 100`
  giving 9616 under a 1-bit control input. The reduction map above gives
  10000 for that pair at every `k`, and the control input here is the 3-bit
  `k`.

The design was not checked for power, delay or area. The reference
multipliers it is usually compared with, such as a Wallace tree, are not
included.
