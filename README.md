# 16 × 16 unsigned serial-parallel multiplier with retimed CASA rows

This is a multiplier for two 16-bit unsigned numbers. One operand, `b`, is
applied in parallel. The other, `A`, arrives serially. A plain serial-parallel
multiplier needs about 2n = 32 cycles for this. Two ideas bring that down to
n + 4 = 20 cycles:

* **Four short rows instead of one long one.** `A` is cut into four 4-bit
  sections. All four sections are fed at the same time, each LSB first on its
  own serial input, into four independent carry-save add-shift (CASA) rows. Each
  row computes a 4 × 16 product, which has 20 bits and so needs 4 + 16 = 20
  cycles to come out. The four 20-bit partial products are then added with a
  Wallace tree and a carry-skip adder.
* **Retiming.** In the classic CASA row a register sits on the sum path between
  neighbouring bit slices. Here that register is moved back onto the serial
  input line. The sums ripple through the row inside one cycle, and the product
  bits reach the output with no register in their way.

The RTL follows the structure of the article *Design of a 16-by-16-bit
Unsigned Serial-parallel Multiplier using Retime Technique*. That article
implemented the design in a 0.18 µm CMOS process and reports 5.7 ns
propagation delay, 2.65 mW power and 52 414 µm² of area. Those figures belong
to that transistor-level implementation and cannot be checked from this RTL.

```
 a_ser[0] ─► CASA row 0 ─► shift reg ─► A (20 bit, weight 2^0)  ─┐
 a_ser[1] ─► CASA row 1 ─► shift reg ─► B (20 bit, weight 2^4)  ─┤  Wallace   ┌──────────┐
 a_ser[2] ─► CASA row 2 ─► shift reg ─► C (20 bit, weight 2^8)  ─┼─► tree ───►│carry-skip├─► p[31:0]
 a_ser[3] ─► CASA row 3 ─► shift reg ─► D (20 bit, weight 2^12) ─┘ (2 levels) │  adder   │
                  ▲ b[15:0] to every row                                      └──────────┘
 start ─► spm_control: accept / shift_en / clr / busy / valid
```

## Using it

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | rising-edge clock |
| `rst_n` | in  | 1     | asynchronous active-low reset |
| `start` | in  | 1     | high in the first cycle of an operation; ignored while `busy` |
| `a_ser` | in  | 4     | `a_ser[k]` carries bits 4k..4k+3 of A, LSB first |
| `b`     | in  | 16    | parallel operand; keep it stable until `valid` |
| `busy`  | out | 1     | operation running (cycles 1..19) |
| `valid` | out | 1     | `p` holds the product of the last operation |
| `p`     | out | 32    | A × b |

Cycle by cycle, counting the cycle in which `start` is high as cycle 0:

```
cycle      0      1      2      3      4 ..   19     20
start      1      -      -      -      -      -      (may be 1 again)
a_ser[k]   A[4k]  A[4k+1] A[4k+2] A[4k+3]  don't care
busy       0      1      1      1      1      1      0
valid      0      0      0      0      0      0      1  (until the next start)
```

`valid` rises after the 20th rising edge. A new operation can start in that
same cycle. The serial inputs are ignored outside cycles 0..3, so they need not
be driven to zero. Example: A = 17 = 0x0011 gives `a_ser[0]` = 1,0,0,0 and
`a_ser[1]` = 1,0,0,0, with `a_ser[3:2]` all zero. With b = 3 the result is
p = 51 after 20 cycles.

Two assertions in `spm16x16` check how the unit is used: `b` must not change
while `busy`, and the final adder must never carry out.

## The retimed CASA row (`casa_row`, `casa_cell`)

A row has 16 bit slices, one per bit of `b`. Slice i has four parts:

* an AND gate that forms `b[i] & a`;
* a full adder that adds the AND output, the sum coming down from slice i+1,
  and its own carry from the previous cycle;
* a flip-flop that keeps that carry for the next cycle;
* a flip-flop on the serial line that passes the serial bit on to slice i+1
  one cycle later.

Slice 15 gets 0 as its incoming sum. Slice 0's sum is the row's output bit.

To see why this multiplies, follow the weights. The serial line delays the
bit by one cycle per slice, so in cycle t slice i sees serial bit a(t−i). Its
AND output then has weight 2^(t−i) · 2^i = 2^t. The same holds for every
slice, so in cycle t the whole row works at weight 2^t. A sum passed
combinationally to the next lower slice keeps that weight. A carry is worth
2^(t+1), and that is exactly the weight its slice works at in the next cycle,
when the carry returns from its flip-flop. Nothing is lost along the way, so
the bit leaving slice 0 in cycle t is bit t of the product. Bits 0..19 come
out in cycles 0..19, provided the serial line carries zeros after the 4
section bits. The controller makes sure of that.

Seen as a retiming: the classic, pipelined row (parameter `RETIMED = 0`)
registers every slice's sum before passing it down, and all slices see the
serial bit in the same cycle. Moving each slice's sum register back through
its adder puts it on the adder's inputs. There it merges with the carry
register that was already in the loop, and becomes a delay on the serial
line. The two rows compute the same bits. The pipelined one produces bit t in
cycle t+1, so a multiplication with it takes 21 cycles. The retimed row buys
its shorter latency and register-free output path with a ripple of up to 16
full adders per cycle along the sum chain.

Between operations, `clr` clears every flip-flop of the rows. The controller
asserts it in the last cycle of an operation and whenever it is idle. After a
correct operation the carries are already zero, because the 20-bit product
has been fully emitted.

## Merging the partial products (`wallace_tree`, `carry_skip_adder`)

Each row's bits are shifted into a 20-bit register (`pp_shift_reg`), first
bit ending in bit 0. After 20 cycles the registers hold A, B, C and D, the
section products with weights 2^0, 2^4, 2^8 and 2^12. Their dot diagram has
column heights 1, 2, 3, 4, 3, 2, 1: four columns each, except eight columns
(12..19) of height 4.

* **Level 1.** Two-bit columns (A+B in 4..7, C+D in 24..27) go into half
  adders. Columns with three or four bits put their first three into a full
  adder: A+B+C in 8..19, B+C+D in 20..23. The D bits of columns 12..19 and
  the single bits of columns 0..3 and 28..31 pass through.
* **Level 2.** Each column now holds at most three bits: the passed bit, its
  level-1 sum and the level-1 carry from below. Three bits go into a full
  adder and two into a half adder; a single bit passes through.

After level 2 every column has at most two bits: a sum row and a carry row.
Because the product fits in 32 bits, no carry leaves column 31.

The carry-skip adder adds the two rows. It uses 4-bit blocks of ripple-carry
full adders. When all four bits of a block propagate, the block's carry-in
also goes straight to the next block, through an AND and an OR gate.

The whole merge is combinational and sits behind the partial-product
registers. `p` is therefore a steady function of registered state: it changes
only while an operation is running.

## Files

| file | content |
|------|---------|
| `rtl/spm_pkg.sv` | default sizes (16-bit `b`, 4-bit sections, 4 rows, 20 cycles), gate and state enums |
| `rtl/spm16x16.sv` | top level: controller, four rows, four shift registers, tree, adder |
| `rtl/spm_control.sv` | operation counter: `accept`, `shift_en`, `clr`, `busy`, `valid` |
| `rtl/casa_row.sv`, `rtl/casa_cell.sv` | CASA row and its bit slice, retimed or pipelined (`RETIMED`) |
| `rtl/pp_shift_reg.sv` | serial-in, parallel-out partial-product register |
| `rtl/wallace_tree.sv` | two-level reduction of the four partial products |
| `rtl/carry_skip_adder.sv` | final adder, `W` bits in blocks of `BLK` |
| `rtl/full_adder.sv`, `rtl/half_adder.sv`, `rtl/gate2.sv`, `rtl/dff_r.sv` | leaf cells: adders, AND/OR gate, D flip-flop |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_spm16x16_pipelined.sv` | end-to-end test of the top with `RETIMED = 0` |

Top parameters: `W_B` (width of `b`, default 16), `NIB` (section width,
default 4) and `RETIMED` (default 1). The number of rows is fixed at 4 by
`spm_pkg::ROWS`: the tree's level-1 grouping assumes at most four bits per
column.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at the default sizes:

```
verilator --binary --timing --assert -Irtl -Itb rtl/spm_pkg.sv tb/tb_spm16x16.sv \
          --top-module tb_spm16x16 -Mdir obj_spm -o sim
./obj_spm/sim
```

`tb_spm16x16` runs the 17 × 3 example, the corner cases 0xFFFF × 0xFFFF,
0 × 0xFFFF, 0xFFFF × 0 and 0x8000 × 0x8000, and 400 random operations. For
each one it checks the product and that `valid` rises after exactly 20
edges. It mixes in back-to-back operations, stray `start` pulses while busy
and junk on `a_ser` after the fourth bit. It also counts back-to-back
operations, ignored starts, junk cycles, carries reaching the final adder and
carries taking a skip path, and fails if any of these never happened. The
module testbenches check each block against an independent model: the leaf
cells exhaustively, the row against `a*b` for both `RETIMED` values, the
tree and the adder with random and corner inputs, and the controller cycle
by cycle.

## Where this RTL goes beyond or departs from the article

* **Interface.** The `start`/`busy`/`valid` handshake, the asynchronous reset,
  the `clr` of the rows and holding the result until the next start are this
  design's choices. The article gives only the data path and the 20-cycle
  timing. Likewise, the article applies `b` to the AND gates directly, and
  this design requires it to stay stable rather than registering it.
* **Partial-product width.** The article's figures label the first row's
  output as 16 bits and the other three as 20. A 4 × 16 product has 20 bits,
  and the article's dot diagram shows 20 for all four, so all four are 20
  bits here.
* **Wallace tree.** Level 1 follows the article's dot diagram exactly.
  The article's cell-level drawing of the tree, with 59 inputs and 48
  outputs, is not reproduced wire by wire. Level 2 is a plain column-wise
  full/half-adder stage that gives the same sum.
* **Final adder.** The article's prose calls it a carry-save adder, but its
  block diagrams call it a carry-skip adder. A carry-save adder cannot finish
  the sum, so a carry-skip adder is used. Its 4-bit block size is this
  design's choice.
* **Pipelined rows.** The 21-cycle latency with `RETIMED = 0` follows from
  the structure; the article gives no number for it.
* **Cells.** The article's transistor-level cells are written as plain
  logic: the 10-transistor full adder, the D flip-flop, and the AND and OR
  gates. Their sizing, and the layout, have no counterpart in RTL.
