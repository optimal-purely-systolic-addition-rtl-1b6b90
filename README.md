# FASTA: a purely systolic adder with √n latency

FASTA adds two n-bit unsigned integers on a square mesh of tiny clocked
cells. Only nearest neighbours are wired together. No wire gets longer and
no cell gets bigger as n grows, so the clock period stays the same at every
size. Fast adders usually use trees (carry-lookahead, prefix adders), and a
tree needs wires whose length grows with n. A ripple-carry adder has only
short wires, but it needs n steps. FASTA sits between the two:

| measure | value (cycles) | order |
|---|---|---|
| latency, first operand bit in to last sum bit out | 3√n − 3 | Θ(√n) |
| period, cycles between two successive additions | √n + 1 | Θ(√n) |
| area | n − √n + 1 cells of constant size | Θ(n) |

If a signal's delay grows with the length of its wire, Θ(√n) is the best
latency any adder can reach. FASTA reaches it, and it also meets the lower
bounds on area·period·time and area·time².

The RTL here is parameterised by `M = √n` (n = M·M). The default is M = 4,
which gives 16-bit operands.

## Carry lookahead in blocks

Every group of bit positions [i, j] has a pair (G, P):

- G is 1 when the group produces a carry out of position j whatever comes in.
- P is 1 when the group passes an incoming carry through.

A single bit has G = a·b and P = a⊕b. Two adjacent groups combine with an
associative operator. With (G,P) for the lower group:

    (G,P) ∘ (G',P') = (G' + P'·G,  P·P')

The n bits are split into M blocks of M bits. Block q covers bits qM … qM+M−1.

1. **Within each block**, the pair of the bits below position i is extended
   one bit at a time, as in a ripple-carry adder. Along the way each position
   gets a *preliminary sum*, the sum bit that would result if no carry entered
   the block:

       s_pre(i) = a_i ⊕ b_i ⊕ G[qM, i−1]

2. **Across blocks**, the carry into block q+1 follows from the carry into
   block q and the pair of block q:

       G[0, qM+M−1] = G_block(q) + P_block(q) · G[0, qM−1]

3. **Correction.** The final sum bit flips the preliminary one when a carry
   enters the block and the bits below position i in that block pass it on:

       s_i = s_pre(i) ⊕ (P[qM, i−1] · G[0, qM−1])

Step 1 takes M cycles per block. Because the blocks follow each other one
cycle apart through the same row of cells, all M blocks are done after about
2M cycles.

## The array

For M = 4:

```
   G=0 ─►┌───┐   ┌───┐   ┌───┐   ┌───┐
   P=1 ─►│ A │──►│ A │──►│ A │──►│ B │──► s_top   (s3, s7, s11, s15, then s16)
         └┬─┬┘   └┬─┬┘   └┬─┬┘   └─┬─┘
          D D     D D     │ └─────►┌─┴─┐
          │ │     │ │     └───────►│ C │──► s_col[2]  (s2, s6, s10, s14)
          D D     │ └───►┌───┐     └─┬─┘
          │ │     └─────►│ D │────►┌─┴─┐
          │ │            └───┘     │ C │──► s_col[1]  (s1, s5, s9, s13)
          │ └──►┌───┐ ┌───┐        └─┬─┘
          └────►│ D │►│ D │───────►┌─┴─┐
                └───┘ └───┘        │ C │──► s_col[0]  (s0, s4, s8, s12)
                                   └─┬─┘
                                     ▼ g_out (carries into each block)
```

Each box is one cell. Each arrow between two cells is a pair of wires
(preliminary sum, propagate), except on the right, where a single carry
wire runs down the C column. The cell types are:

- **A-cell**, M−1 of them, top row (`fasta_a_cell`). Column k takes bit
  qM+k and the (G,P) pair of bits qM … qM+k−1 from its left. It passes the
  extended pair to the right. Downward it emits the preliminary sum bit and
  the *incoming* propagate P[qM, qM+k−1], which the correction needs. The
  leftmost cell is fed the constant pair (G,P) = (0,1), the pair of an empty
  group.
- **B-cell**, top right (`fasta_b_cell`). It handles the last bit of every
  block and chains the blocks together. Its flip-flop O2 holds the carry
  into the current block. The carry into its own bit is
  `c = G_in + P_in·O2`. It registers the final sum bit a⊕b⊕c on O1, and the
  carry out of the block, a·b + (a⊕b)·c, back into O2. No C-cell is needed
  for this bit, because the B-cell already knows the block's incoming carry.
  The gate netlist (two XOR, two AND, two OR, two flip-flops) follows the
  original schematic.
- **C-cell**, M−1 of them, right column (`fasta_c_cell`). The cell in row r
  serves bit column k = M−1−r. It computes `s = s_pre ⊕ (P·G)` and hands the
  block carry G one row down, one cycle later.
- **D-cell**, (M−1)(M−2) of them (`fasta_d_cell`). Each one delays its
  (s_pre, P) pair by one cycle.

All cell outputs are registered. A value applied in cycle t appears in cycle
t+1.

The C-cell of column k receives the carry for block q in cycle t0+q+2M−k−3.
A-cell k delivers its outputs for block q in cycle t0+q+k+1. The D-cells make
up the difference of 2(M−2−k) cycles: column M−2 goes straight into its
C-cell, and column 0 passes 2(M−2) D-cells (`fasta_delay_net`). Counting all
cells, there are only 2M−1 logic cells (A, B, C). The rest are plain delay
stages.

## The diagonal I/O scheme

This is the part that needs the most care when driving the adder. Operands
do not arrive as parallel words. Each block arrives as a *diagonal*:

- Bit qM+k of both operands enters column k in cycle t0+q+k.
- Block q+1 follows block q one cycle later.
- After the M operand diagonals comes one **separator diagonal**:
  - the pair (a,b) = (0,1) on every A column, in cycle t0+M+k;
  - the pair (0,0) on the B column, in cycle t0+2M−1.
- Columns with nothing to do are fed (0,0).

The separator does two jobs:

- The pair (0,1) has G = 0 and P = 1, so it passes through the A-cells
  unchanged, and the B-cell sees G_in = 0, P_in = 1 with a = b = 0. Then
  O1 becomes the stored carry, which is the carry-out s_n.
- O2 becomes 0, so the B-cell starts the next addition with no carry in.

This is why the next addition can start in cycle t0+M+1, which gives a period
of M+1. No reset or control signal is needed between additions.

The input stream for M = 4, cycle by cycle (computation 1 starts at 0,
computation 2 at 5):

| cycle | col 0 | col 1 | col 2 | col 3 (B) |
|---|---|---|---|---|
| 0 | a0 b0 | | | |
| 1 | a4 b4 | a1 b1 | | |
| 2 | a8 b8 | a5 b5 | a2 b2 | 0 0 |
| 3 | a12 b12 | a9 b9 | a6 b6 | a3 b3 |
| 4 | 0 1 | a13 b13 | a10 b10 | a7 b7 |
| 5 | a0' b0' | 0 1 | a14 b14 | a11 b11 |
| 6 | a4' b4' | a1' b1' | 0 1 | a15 b15 |
| 7 | a8' b8' | a5' b5' | a2' b2' | 0 0 |

The outputs, for a computation starting in cycle t0:

| port | carries | in cycle |
|---|---|---|
| `s_top` | s_{qM+M−1} for q = 0…M−1, then s_n | t0+q+M, then t0+2M |
| `s_col[k]` | s_{qM+k} | t0+q+2M−k−2 |
| `g_out` | carry into bit qM, q = 0…M | t0+q+2M−2 |

In the same slot as s_n, every `s_col` output carries a don't-care value. The
last sum bit, s_{(M−1)M}, leaves `s_col[0]` in cycle t0+3M−3. For M = 2 the
carry-out comes later than that, in cycle t0+4, so the latency formula
3M−3 holds only for M ≥ 3.

### Other operand lengths

The array never counts diagonals, so it can also take Q ≠ M operand
diagonals before the separator. The operands are then N = Q·M bits wide,
and the latency is Q+2M−3 (for M ≥ 3) with a period of Q+1. Both are
verified for Q from 1 to 3M.

The original design also claims that a shorter addition (N < n) runs with
the latency of the smaller array FASTA_N. Feeding fewer diagonals into the
full array does not achieve that: the carries still traverse the full C
column, so the latency stays Q+2M−3.

## Design choices beyond the original

- **Reset.** Every flip-flop has a synchronous, active-low reset `rst_n`
  that clears it. The original design needs no reset: its separator clears
  the B-cell. The reset just gives a clean start without a leading
  separator.
- **A-cell and C-cell gates.** For these cells the original gives only the
  ports and equations, so the equations are implemented directly. The B-cell
  follows the published gate schematic.
- **Sum bit in the B-cell.** It is the XOR of the preliminary sum and the
  carry term, as in the schematic and the plain sum equation.
- **Ports.** The diagonal interface is one bit pair per column per cycle.
  The port names are this design's own.

## Not included

- **Two's-complement addition and subtraction.** It is said to follow from
  a standard technique, which is not spelled out.
- **The C-testable variant.** It has an extra OR gate and flip-flop per
  A-cell and an 11-pattern stuck-at test. Their connections and the patterns
  are not given.
- **Coarse-grained radix-2^m cells.** These are only outlined as a possible
  variant.
- **Parallel-word interfaces.** Converting to and from the diagonal format
  is left to the user of the adder.

## Files

| file | contents |
|---|---|
| `rtl/fasta_pkg.sv` | (G,P) pair type, the ∘ operator, the empty-group constant |
| `rtl/fasta_a_cell.sv`, `fasta_b_cell.sv`, `fasta_c_cell.sv`, `fasta_d_cell.sv` | the four cell types |
| `rtl/fasta_top_row.sv` | M−1 A-cells and the B-cell |
| `rtl/fasta_delay_net.sv` | the D-cell triangle |
| `rtl/fasta_c_column.sv` | the C-cell column |
| `rtl/fasta.sv` | top level, parameter `M` (default 4) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/fasta_stim_check.sv` | diagonal-format driver and scoreboard used by the top-level tests |
| `tb/tb_fasta_sizes.sv` | the whole adder at M = 2, 3, 5, 8 |

## Simulating

With Verilator 5 (any testbench works the same way):

```
verilator --binary --timing --assert -Irtl -Itb rtl/fasta_pkg.sv tb/tb_fasta.sv \
          --top-module tb_fasta -Mdir obj_tb_fasta
./obj_tb_fasta/Vtb_fasta
```

Each testbench ends with a line `TB_RESULT checks=N failures=F`.

**What the tests cover.**

- `tb_fasta` streams 400 additions through the default M = 4 array:
  - random operands, plus corner cases such as all-ones + 1, where a carry
    ripples through every block;
  - back to back and with idle gaps;
  - Q = M, Q > M and Q < M diagonals.
- It checks every sum bit, the carry-out and the block-carry stream in the
  exact cycle the schedule predicts. That also checks the latency and the
  period.
- It counts how often each mechanism occurs and fails if one never does:
  - back-to-back starts;
  - a carry-out of 1 followed at once by the next addition (the separator
    must clear the carry);
  - a C-cell correction;
  - each operand-length case.
- `tb_fasta_sizes` runs the same tests at M = 2, 3, 5 and 8.

**Changing the size.** Set `M` on `fasta`. The operand width is M². All
internal counts (M−1 A- and C-cells, (M−1)(M−2) D-cells) follow from M, and
M must be at least 2.
