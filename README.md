# Modulo 2^n+1 multiplier with compressor reduction and a sparse-tree end-around-carry adder

Multiplication modulo 2^n+1 is a core operation of the IDEA block cipher, of
Fermat number transforms and of residue number systems built on the moduli
(2^n-1, 2^n, 2^n+1). It is awkward in hardware because the residues need
n+1 bits: 2^n itself is a legal operand and result. This RTL computes

    r = x * y mod (2^n + 1),    x, y, r in [0, 2^n], all (n+1) bits wide,

in one combinational pass, with no clock and no registers. The default is
n = 16 (17-bit operands, modulus 65537).

The design has three stages:

1. **Partial product generation** folds the (n+1) x (n+1) bit product matrix
   into n rows of n bits, plus one constant row.
2. **Partial product reduction** adds those n+1 rows with 7:2, 5:2, 4:2 and
   3:2 compressor stages. Every carry that leaves the top column comes back
   into the bottom column complemented. The result is an n-bit sum vector and
   an n-bit carry vector.
3. **Final addition** uses an inverted end-around-carry (IEAC) adder to add
   the two vectors plus 1 modulo 2^n+1. Its carry network is a sparse tree: it
   computes the carry into every 4th bit only, and conditional sum
   generators fill in the other bits.

The whole trick is that everything modulo 2^n+1 becomes ordinary n-bit
arithmetic plus constants. Those constants add up to exactly 3, whatever
the operands. Stage 1 adds 2 of it as a row of the matrix. The final adder
adds the remaining 1 at no cost, because an IEAC adder computes a+b+1
mod 2^n+1 by construction.

## Operands and interface

`modmul_top #(N)` has three ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x`  | in  | N+1 | multiplicand, 0 .. 2^N |
| `y`  | in  | N+1 | multiplier, 0 .. 2^N |
| `r`  | out | N+1 | x*y mod (2^N+1) |

The operands are plain weighted binary numbers. Bit N of an operand may be
set only when the operand is exactly 2^N, so all its other bits are 0. The
design does not check this, and an illegal input gives a meaningless
result. Bit N of `r` is set only when the result is 2^N.

The design is purely combinational: `r` depends only on the present `x` and
`y`. To use it as IDEA's 16-bit multiplication, map the 16-bit value 0 to
2^16 on the way in, and map a result of 2^16 back to 0 on the way out.

## Stage 1: folding the product matrix (`modmul_ppgen`)

Write p(i,j) = x_i AND y_j. The full matrix has four regions, and at most
one of them can be non-zero at a time:

* both operands below 2^n: the n x n core;
* x = 2^n: the terms x_n y_j;
* y = 2^n: the terms x_i y_n;
* both equal 2^n: the single term x_n y_n.

Because at most one region is non-zero, the regions can be merged with OR
gates instead of adders:

* q_k = x_n y_k OR x_k y_n is ORed into the top bit of row k+1, the core
  term of the same weight.
* q_(n-1) has weight 2^(2n-1), which is 2^(n-1) + 1 mod 2^n+1. It is
  therefore ORed into both bit n-1 and bit 0 of row 0.
* x_n y_n has weight 2^(2n), which is 1 mod 2^n+1. It is ORed into bit 0 of
  row 0.

Row j of the core then reaches up to weight 2^(2n-2). A bit b of weight
2^(n+k) is worth -b * 2^k mod 2^n+1, which equals (NOT b) * 2^k - 2^k.
Each such bit is therefore complemented and moved down to column k, and the
-2^k it leaves behind is collected into a constant. The result is n rows of
exactly n bits each. In row j:

| column m | bit |
|---|---|
| m >= j | p(m-j, j), ORed with q_(j-1) when m-j = n-1 |
| m < j  | NOT p(m-j+n, j), with q_(j-1) ORed in under the NOT when m = j-1 |
| row 0, bit n-1 | also ORed with q_(n-1) |
| row 0, bit 0 | also ORed with q_(n-1) and x_n y_n |

The bits moved down leave a total of -(2^n - n - 1). The reduction array
leaves another -(n-1) (see below). Together that is -2^n + 2, which is
+3 mod 2^n+1. Row n of the matrix is the constant 2, and the final adder
adds the last 1.

**Worked example (n = 8).** Take 119 x 87 mod 257 = 73. The nine rows the
RTL produces are:

    01110111 11101111 11011110 00000111 01111000 00011111 11100010 01111111 00000010

The reduction array turns them into sum vector 212 and carry vector 117.
The final adder returns 212 + 117 + 1 - 257 = 73. These rows and vectors
match the published example bit for bit.

## Stage 2: the compressor array (`modmul_ppr`)

All n columns of the array are identical. This is what lets carries wrap
around. The array is a sequence of stages. At the start of a stage, each
column holds the same number M of bits of equal weight, called its pool.
The first stage's pool is the n+1 row bits.

In each stage, every column feeds the front of its pool to one compressor.
The compressor is the largest one that M allows, in the order of
preference 7:2, 5:2, 4:2, 3:2. The elaboration-time functions in
`modmul_pkg` work this plan out for any N. Column k's next pool is, in
order:

* the compressor's sum;
* the weight-2 outputs of column k-1;
* the weight-4 output of column k-2 (7:2 stages only);
* the bits this stage did not use.

Each stage therefore takes its inputs only from the previous stage, and no
carry ripples sideways within a stage. This matters in a ring of columns,
where a sideways ripple would close into a combinational loop.

| n | stages |
|---|---|
| 4  | 4:2, 3:2 |
| 8  | 7:2, 3:2, 3:2 |
| 12 | 7:2, 5:2, 4:2, 3:2 |
| 16 | 7:2, 7:2, 5:2, 3:2, 3:2 (rows 0-8, 9-13 and 14-16 enter the first three stages) |
| 20 | 7:2 x3, 4:2, 3:2, 3:2 |
| 24 | 7:2 x4, 4:2, 3:2 |
| 28 | 7:2 x5, 3:2, 3:2 |
| 32 | 7:2 x5, 5:2, 4:2, 3:2 |

The published text gives the plans for n = 8 and n = 16, and the RTL
reproduces both. The greedy rule generates the other sizes.

**End-around carries.** Some carries leave the top of the ring:

* A carry out of column n-1 has weight 2^n, which is -1 mod 2^n+1. It
  re-enters column 0 complemented.
* A 7:2 compressor's weight-4 carry out of column n-2 re-enters column 0
  complemented.
* The same kind of carry out of column n-1 re-enters column 1 complemented.
* The carry out of column n-1 in the last stage becomes bit 0 of the carry
  vector, also complemented.

Each complemented re-entry leaves a constant behind. Per stage and column,
a 3:2 stage leaves 1, a 4:2 stage 2, a 5:2 stage 3 and a 7:2 stage 5. For
every compressor, that number equals the bits it removes from the pool.
Taking n+1 rows down to 2 removes n-1 bits, so the constants always total
n-1, whatever mix of compressors is used. This is why the correction
constant does not depend on the array's shape.

## Compressor cells

The cells are built mostly from 2:1 multiplexers, with XOR/XNOR gates
forming the multiplexer selects. Every input and output bit has weight 2^i unless the list
says otherwise.

* `comp32`: a + b + c = sum + 2 carry. The half sum a^b selects both
  multiplexers.
* `comp42`: x1..x4 + cin = sum + 2 (carry + cout). cout does not depend on
  cin.
* `comp52`: x1..x5 + cin1 + cin2 = sum + 2 (carry + cout1 + cout2). cout1 is
  the majority of x1..x3, and cout2 is the majority of x4, x5 and cin1.
* `comp72`: x1..x7 + cin1 + cin2 = sum + 2 (carry + cout2) + 4 cout1. Two
  majority/parity groups, {x5,x6,x7} and {x2,x3,x4}, are combined with x1.
  The three resulting carries of weight 2 are compressed again into cout2
  (weight 2) and cout1 (weight 4). The carry-outs are formed from x1..x7
  alone, so they never depend on the carry inputs. Nine input bits leave
  the cell as four.
* `cgen`: the majority cell, (x+y)z + xy.

## Stage 3: the sparse-tree inverted EAC adder (`ieac_sparse_adder`)

The adder relies on this identity:

    |S + C + 1| mod (2^n+1)  =  |S + C + NOT cout| mod 2^n

Here cout is the carry out of S + C. Feeding NOT cout back as the carry-in
would form a combinational loop. Instead, `ieac_sparse_carry` writes every
carry it needs directly in terms of group generate G and group propagate P.
Bit generate is g = a AND b and bit propagate is p = a OR b.

    carry into bit 0      C*(-1) = NOT G[n-1:0]
    carry out of bit i    C*(i)  = G[i:0]  OR  P[i:0] AND NOT G[n-1:i+1]

Only the carries into bits 0, 4, 8, ... are computed. The network has four
steps:

1. Each 4-bit block is reduced to one (G,P) pair by a two-level tree of
   merges: pairs of bits, then pairs of pairs.
2. A Kogge-Stone style prefix over the blocks gives G[4b+3:0].
3. A mirrored suffix network over the blocks gives G[n-1:4b].
4. One final merge per block forms C*.

Steps 2 and 3 each take ceil(log2(n/4)) levels. The adder's parameter K sets
the block size. The multiplier uses K = 4; K = 8, the other sparseness the
sparse-tree scheme mentions, is also tested on its own.

Each block's `csg` (conditional sum generator) runs two ripple rails. One
assumes a carry-in of 0 and the other a carry-in of 1. The block's C*
then selects the sum bits through 2:1 multiplexers. The rails are off the
critical path.

The result is 2^n exactly when S + C = 2^n - 1, which means S and C are
bitwise complementary. The top result bit is therefore the AND of all the
half sums S_i XOR C_i. In that case the low bits come out as 0 on their
own.

## Where this RTL departs from or adds to the published description

* **Transformed carry equation not used.** The published adder rewrites the
  wrapped carries, for example C*_3, as NOT((NOT P, NOT G) o (G,P)) so
  that they fit in log2 n levels. With OR-type propagate signals that form
  is wrong when a block both generates and contains a killing bit.
  Example: G[3:0] = 1 with P[3:0] = 0. The RTL uses the untransformed
  equation above, which is exact. The suffix network still keeps it at log
  depth.
* **Top result bit.** The published text calls the top result bit the
  adder's group propagate, and also says it marks complementary Sum and
  Carry vectors. With propagate defined as a OR b these two statements
  differ. The RTL implements the complementary-vector condition, as the
  AND of the half sums.
* **4:2 compressor.** It is only named, with its delay (one XOR/XNOR and two
  MUXes) and size (six XOR/MUX cells). The RTL uses a standard MUX-based
  4:2 cell of that size.
* **7:2 and 5:2 cells.** The RTL follows the published block diagrams'
  blocks and grouping. The per-block equations are this design's reading.
  The 7:2 cell's weight-4 output is named cout1, from the order of the
  column diagram's labels.
* **Array shape for n other than 8 and 16.** It is the greedy plan above. The
  mapping of pool bits to compressor pins is this design's choice.
* **Sparse network layout.** The block-level prefix/suffix arrangement is
  this design's. The published 16-bit drawing places its carry-merge cells
  differently, with cells that also give complemented outputs.
* **No pipelining.** Like the published design, the multiplier is one
  combinational block. The published unit-gate and standard-cell area,
  delay and power figures were not reproduced; this RTL makes no timing
  claim.

## Files and hierarchy

    modmul_top                 combinational multiplier, parameter N (default 16)
      modmul_ppgen             stage 1
      modmul_ppr               stage 2, uses comp72 / comp52 / comp42 / comp32
        comp72, comp52         use cgen
      ieac_sparse_adder        stage 3, parameter K = 4
        ieac_sparse_carry
        csg                    one per 4-bit block
    modmul_pkg                 compressor-plan functions, gp_t and gp_merge

N must be a multiple of 4, which is the adder's block size. Every size from
4 to 32 in steps of 4 has been simulated. `modmul_top` also contains one
immediate assertion: a result with bit N set must have all other bits
clear.

## Simulation

Every testbench is self-checking. Each prints a single line
`TB_RESULT checks=<n> failures=<n>` and stops, and each has a watchdog.
To run one with Verilator (the package must come first):

    verilator --binary --timing --assert -Irtl -Itb rtl/modmul_pkg.sv \
        tb/tb_modmul_top.sv --top-module tb_modmul_top -Mdir obj
    ./obj/Vtb_modmul_top

| testbench | what it checks |
|---|---|
| `tb_modmul_top` | default n = 16: corner cases and 10^6 random legal pairs against x*y mod 65537. It also requires every operand class (x, y, both or neither equal to 2^16), a result of 2^16 and both values of the end-around carry. |
| `tb_modmul_sizes` | n = 4 and 8 exhaustively; n = 12 to 32 (steps of 4) with random pairs; the n = 8 worked example, including its intermediate vectors 212 and 117. |
| `tb_modmul_ppgen` | rows sum to x*y + 2^n - n + 1 mod 2^n+1 (n = 4, 8, 16); the n = 8 example rows. |
| `tb_modmul_ppr` | S + C = sum of rows + n - 1 mod 2^n+1 for random rows at n = 4, 8, 12, 16, so every compressor kind is used; the stage plans. |
| `tb_ieac_sparse_adder` | r = a + b + 1 mod 2^n+1 at n = 8, 12, 16, 32, and at n = 32 with carries every 8th bit (K = 8). |
| `tb_ieac_sparse_carry` | block carries against integer addition with the end-around carry. |
| `tb_csg`, `tb_comp*` | exhaustive checks of each cell's arithmetic identity, and that carry-outs do not depend on carry inputs. |

The helper modules `top_chk`, `ppr_chk`, `ppgen_chk` and `adder_chk` in
`tb/` drive one instance of their unit at a given size.

**What is and is not verified.** Functional correctness has been checked
at all eight sizes, exhaustively at n = 4 and 8. Lint is clean, and
synthesis finds no latches and no combinational loops. Gate-level delay,
area and power have not been evaluated.
