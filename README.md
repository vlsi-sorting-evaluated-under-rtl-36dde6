# Matrix-comparator sorter with a one-board external sorting scheme

Most hardware sorters move a k-bit key either all at once (k wires per key)
or one bit at a time (k clocks per comparison). This design sits between the
two. A key is held as a square bit matrix of sqrt(k) x sqrt(k) bits and moves
through the hardware one column per clock. Comparing two keys then takes
O(sqrt(k)) clocks instead of O(k), and the comparator still needs only
nearest-neighbour wires. That matters when wire length is charged in the cost
model, where signal delay grows with distance.

The RTL has three layers:

1. **Matrix comparator.** A systolic compare-exchange cell for two matrix
   keys.
2. **Sorting chip S.** A small sorter for NS keys built from matrix
   comparators. A converter, SEMA, turns bit-serial input keys into
   matrices.
3. **One-board external sorter.** It sorts more keys than S holds, using four
   FIFO "shift memories" and S. Two control schemes are provided:
   - **BBB(S):** Batcher's bitonic sort on blocks of keys.
   - **TWB(S):** two-way merge on blocks.

The top module `vlsi_sort_top` chains them. Keys come in bit-serially, SEMA
turns them into matrices, and a loader fills the memories of the board
selected by `alg_twb`. The board sorts, and the sorted keys come out as
block words.

## Key format

A key of K = R*S bits is an R-row, S-column matrix. Column t (t = 0..S-1)
holds key bits (S-1-t)*R .. (S-1-t)*R + R-1. Row i of column t is bit
(S-1-t)*R + i.

- Column 0 is the most significant column, and it travels first.
- Within a column, row R-1 is the most significant row.

At the default K = 16, R = S = 4, so a key is a 4 x 4 matrix sent as four
4-bit columns, most significant nibble first.

A *block* is NS/2 keys. A *block word* is one column of each of those keys
side by side: key n of the block sits in bits [n*R +: R]. A block is S words
long. Blocks are the unit that the memories of the board store.

## The matrix comparator (`matrix_comparator`)

This is the least obvious part of the design, and everything else depends on
it.

### The problem

Two keys X and Y pass through the comparator one column per clock. Each
column has R bits of X and R bits of Y, all of the same significance. Which
key is larger depends on the *most significant bit position where X and Y
differ*. That position can be in any row of any column. Every column of the
pair, including columns that have already entered, must learn the answer
before it reaches the exchange stage. The wiring may only connect
neighbouring cells.

### Cells

Every row has a chain of R cells of two kinds, followed by an exchange cell:

- **B cells** carry the bit pair {x, y} of the row unchanged to the right.
  The key data flows through these.
- **C cells** carry a two-bit *decision* d = {x, y} that starts as the bit
  pair itself. A pair of 00 or 11 means "no difference here". The code calls
  this value *e*.
- **R cells** at the end of each row output {y, x} (exchange) when the
  decision is 10, meaning X is larger at the deciding bit. Otherwise they
  output {x, y}.

Each clock, each C cell takes its new decision from its neighbours, in this
order of priority:

| priority | neighbour | condition | meaning |
|---|---|---|---|
| 1 | east (the column that entered one clock earlier) | east is not e | a more significant column has already decided |
| 2 | south (row i+1, same column) | east is e, south is not e | a more significant row of the same column has decided |
| 3 | north (row i-1) | east, south and own are all e | copy from a less significant row |
| 4 | own value | otherwise | keep |

Data moves to the right one cell per clock, so the east neighbour of a C cell
holds the *previous* column of the same key pair, which is more significant.
The decisions spread in two directions:

- **Within a column.** The south rule lets a difference found in row j
  spread, one row per clock, into the less significant rows j-1, j-2, ...
  The north rule carries it the other way, into the more significant rows
  of the same column. Their own bits are equal and their south neighbours,
  more significant still, have no decision, so they take it over. After at most R-1 clocks, every row of
  the deciding column carries the decision. A whole column must be exchanged
  or kept as one.
- **Along the pair.** The east rule lets every later (less significant)
  column take over the decision of the earlier column next to it. An earlier
  decision always wins over a later column's own bits.

A column has R cell columns to travel through before the exchange. The
decision therefore reaches every row of every column of the pair before that
column reaches the R cells. The R cells then exchange whole columns
consistently. Equal keys never produce a non-e decision, so they pass
unchanged.

### Choices made here

- **R cell columns, not R-1.** With one column fewer, a difference found in
  the last column of a key can fail to reach all rows in time. Randomised
  tests show this. With R columns all tests pass, including keys that differ
  only in their least significant bit or in a single row.
- **Head flag.** A flag travels with the first column of each key pair. On
  that column the C cell ignores its east neighbour, which holds the last
  column of the *previous* pair. Pairs can therefore follow each other with
  no gap, one pair every S clocks.
- **Direction flag.** `in_desc` makes the R cells exchange on decision 01
  instead of 10. The result is then descending, which bitonic sorting needs.
- **One register update per clock.** The original description splits each
  clock into a load phase and a spreading phase. Here both happen in one
  register update. Each cell's new value depends only on the registers of
  its neighbours.

### Timing

A column leaves `mc_latency(R)` = R+1 clocks after it enters. A new pair can
start every S clocks. Nothing requires R = S: the cell array is R x R
whatever S is. A key with few rows and many columns needs few cells but
occupies the comparator for longer. A sorter built from such comparators
trades area against period with the choice of R and S.

`out_lo` carries the smaller key and `out_hi` the larger, or the other way
round when descending.

## Sorting chip S (`oet_sorter`)

S sorts NS keys that arrive in parallel, one column per clock each. It is
NS stages of odd-even transposition:

- Even stages compare keys (0,1), (2,3), and so on.
- Odd stages compare keys (1,2), (3,4), and so on.
- A key with no partner in a stage goes through a delay line of the
  comparator latency.

The direction flag travels with the keys, so one set can be sorted ascending
and the next descending.

Timing:
- The latency TS is NS * (R+1) clocks.
- A new set can enter every S clocks.

The defaults are NS = 4 and R = 4, so TS = 20. The source names the sorting
chip only by its parameters: its capacity n_S, its time t_S and its period
p_S. Odd-even transposition with matrix comparators is this design's choice
for its insides.

## From bit-serial to matrix keys: TOSI and SEMA

Keys usually arrive as a bit stream. SEMA ("serial to matrix") rearranges Q
keys of K bits into Q x Q matrices (Q = sqrt(K)). It works on an array of
Q x K processing elements, each holding two one-bit registers, A and B.

### Loading

Row y of the array receives key y bit-serially, most significant bit first.
After K clocks, row y holds the key left to right.

### TOSI(r, s): stacked keys to side-by-side keys

The array is cut into tiles of 2r rows and s columns. Each tile holds an
r x s key X on top of an r x s key Y. TOSI turns the tile into two
2r x s/2 keys side by side, with X on the right and Y on the left. It takes
three steps:

1. **1 clock.** The left half of the tile copies A into B.
2. **s/2 clocks.**
   - In the upper r rows, B shifts right: the left half of X moves into the
     right half.
   - In the lower r rows, A shifts left: the right half of Y moves into the
     left half.

   Each PE now holds at most two bits.
3. **2r clocks.** Treat each column of a tile half as a chain of registers
   A, B, A, B, ... from top to bottom. In the right half everything moves
   down; in the left half everything moves up. Each bit stops when it
   reaches its final A register.

   The stop rule is this design's own. In clock t of step 3, a PE whose
   place in the chain is below 2t+1 (right half) or 2t (left half) holds its
   bit. The end state then has every bit in an A register, with the rows
   interleaved correctly.

TOSI(r, s) takes 1 + s/2 + 2r clocks.

### SEMA

SEMA applies TOSI(1, K), TOSI(2, K/2), ..., TOSI(Q/2, 2Q) back to back. Each
application doubles the height of every key and halves its width. At the
end, the Q keys sit side by side as Q x Q tiles. The whole transform takes
log2(Q) + Q + K - 2 clocks: 20 clocks for K = 16.

Row t of a tile, read from the top, is exactly column t of the key in the
comparator format above. The loader can therefore copy tile rows straight
into block words.

## The one-board external sorter

### Structure

One board holds four FIFO memories M00, M01, M10 and M11, the sorting chip
S, an input control unit CI and an output control unit CO. The memories are
the "data chips" (`shift_memory`).

- The memories work as large shift registers. Nothing is addressed, and all
  data flows in a loop: memory → S → memory.
- One memory pair is the input and the other the output. Their roles swap
  after each pass.
- A pass sends every block through S once.

At the start, 2^M unsorted blocks are split between M00 and M01 (M = 3 by
default, 8 blocks of 2 keys). The result ends in one memory in ascending
order. The board records which memory that is and unloads from it.

`shift_memory` is written as an array with read and write pointers, not as
a literal shift register. Its behaviour at the ports is the same: first in,
first out, one word per clock, no addresses.

### BBB(S): bitonic sort on blocks (`bbb_controller`, `bbb_sorter`)

Batcher's bitonic network is run with whole blocks as the elements. Each
compare-exchange becomes a "sort-split": S sorts two blocks together and
produces a lower and an upper block.

The controller runs the loops j = 0..M-1 and k = 0..j, with p set to j when
k = j. That gives (M^2+M)/2 passes. In one pass, for i = 0 .. 2^(M-1)-1:

- **CI** reads block i from Mq0 and block i from Mq1. S sorts them
  ascending if bit j of i is 0, and descending otherwise.
- **CO** writes both result blocks, lower first, into M(not q)r with
  r = bit p of i.

Because r is a bit of i, the output memory alternates every 2^p pairs. This
carries out the perfect-shuffle wiring of the bitonic network without any
addressing. After the pass q flips, and the output pair becomes the input
pair. In the last pass p = M-1, so r = 0 for every pair and all blocks land
in one memory, sorted.

Pacing:
- A pair enters S every 2S clocks. Both result blocks must go into the same
  FIFO, which takes one word per clock.
- The upper block waits in an S-word buffer while the lower one is written.
- One pass takes 2^(M-1) * 2S + TS clocks, which is 52 at the defaults.

The whole sort is 6 passes.

### TWB(S): two-way merge on blocks (`twb_controller`, `twb_sorter`)

BBB sends all data through S O(log² N) times. TWB merges sorted runs of
blocks pairwise instead, so it needs only M passes. In return, its control
depends on the data.

**The runs.** Pass j (j = 1..M) merges runs of 2^(j-1) blocks from Mp0 and
Mp1 into runs of 2^j blocks. Output runs alternate between M(not p)1 and
M(not p)0, starting with 1. After the pass, p flips. In pass 1 the blocks
are not yet sorted internally. Their single sort-split per merge sorts them.

**The kept block.** After each sort-split, the upper (larger) block stays
"in" S and is merged with the next block read. Only the lower block goes to
the output memory. Here the kept block is S's upper output, fed straight
back into S's upper inputs in the same clocks as the next block's columns
(`sel_recirc`).

A merge starts by reading the first block of the Mp1 run as the kept block,
together with the first block of the Mp0 run. After the merge's last
sort-split, the kept block goes through a hold buffer and is written after
the last lower block.

**Choosing the next block.** The controller tracks these values:
- n0 and n1: how many blocks of each run have been read.
- r: the run to read next.
- max: the largest key read so far, which is the last key of a sorted block.

After reading a block from run r, it increments n_r and *switches* r to the
other run in either of two cases:
- The new block's largest key exceeds max, and the other run is not used
  up. The other run now holds the smaller keys, so it must be read next.
- Run r is used up.

When it switches because of a larger key, max is updated. The largest key
of a block arrives column by column on `new_last_col` while the block is
fed, so the decision is ready one clock after the block has been read.

**Timing.** One sort-split takes TS clocks, because the next block can only
enter when the kept block comes out of S. A merge of 2^j blocks takes
(2^j - 1) * TS + 2S clocks. In total there are ((M-1) * 2^M + 1) = 17
sort-splits at M = 3.

## Whole sorter (`vlsi_sort_top`)

The top has two independent sides, so that slow bit-serial input does not
hold the sorting chip back.

**Input side.** Keys go into a third pair of FIFOs, X0/X1, the *staging
pair*:

1. **Shift in.** While `ser_ready` is high, shift in a group of Q keys:
   K clocks with `ser_valid`, bit y of `ser_bits` carrying key y, most
   significant bit first.
2. **SEMA.** Transform the group (20 clocks).
3. **Stage.** Copy the group's tiles into X0/X1, Q words per block,
   alternating between X0 and X1.
4. Repeat steps 1–3 until 2^M blocks (16 keys) are staged. Then wait until
   the board side has taken them.

**Board side.**

1. **Move.** When the staging pair is full and the board is free, move X0
   into M00 and X1 into M01 of the chosen board, one word per clock. Start
   the sort.
2. **Sort.** `sorting` is high while the board sorts.
3. **Output.** While `out_valid` is high, `out_col` carries result words and
   `out_pop` takes them. The words come block by block in ascending order,
   word t of a block being row t of each key.

As soon as the staging pair has been emptied, the input side accepts the
next round. Its input therefore overlaps the sort and the output of the
current round.

`alg_twb` is sampled while the first group of a round is shifted in. It
selects the BBB board (0) or the TWB board (1). Status outputs count the
inner steps:
- BBB: `part_done`, `cur_q/j/k/p`, `wr_r`, `s_desc`.
- TWB: `merge_done`, `pass_done`, `switched`.
- Both: `sema_done`.

Parameters: K = 16, NS = 4, M = 3. The sizes come from the examples the
design is based on: 16-bit keys as 4 x 4 matrices, and 8 blocks for the
block sorters. NS is this design's own choice. K must be a square, and NS/2
must divide sqrt(K).

## Where this design departs from or adds to its source

- **Comparator.** Uses R cell columns instead of the R-1 drawn in the
  original figure. It also adds head and direction flags.
- **Sorting chip S.** Its insides (odd-even transposition) are this
  design's choice. The source gives only its parameters.
- **TOSI step 3.** The stop rule is this design's. The source only says
  the bits move until they sit in A registers.
- **SEMA array size.** SEMA works on groups of sqrt(K) keys and repeats for
  more keys. The source uses one large array for all keys.
- **BBB pacing.** p_S = 2S, with a buffer for the upper block. All blocks
  of the final pass go into one memory.
- **TWB feedback.** The kept block is fed back from S's output. Its last
  block is written through a hold buffer.
- **Third memory pair.** It takes only the input. The result is read
  straight from the board memory that the final pass wrote, not through
  the third pair.
- **Board selection.** Both boards exist in the top, chosen per round.
- **Not built.** The area-saving comparator variant with CP cells, and the
  LSSS-based "M-M-sorter" whose algorithm is defined elsewhere.
- **Reset.** Synchronous and active low everywhere. Memory arrays are
  cleared only through their pointers.

## Files and simulation

| file | contents |
|---|---|
| `rtl/vsort_pkg.sv` | shared types and functions (`mc_latency`, bit-pair helpers) |
| `rtl/matrix_comparator.sv` | systolic matrix comparator |
| `rtl/oet_sorter.sv` | sorting chip S |
| `rtl/shift_memory.sv` | FIFO data memory |
| `rtl/tosi_array.sv`, `rtl/sema.sv` | serial-to-matrix conversion |
| `rtl/bbb_controller.sv`, `rtl/bbb_sorter.sv` | BBB(S) control and board |
| `rtl/twb_controller.sv`, `rtl/twb_sorter.sv` | TWB(S) control and board |
| `rtl/vlsi_sort_top.sv` | whole sorter |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each
has a watchdog. Random data comes from `$urandom`, and results are compared
with a software sort or a software model.

To run one, compile the package first, then every RTL file, then the
testbench:

```
verilator --binary --timing --assert -Irtl rtl/vsort_pkg.sv \
  rtl/matrix_comparator.sv rtl/oet_sorter.sv rtl/shift_memory.sv \
  rtl/tosi_array.sv rtl/sema.sv rtl/bbb_controller.sv rtl/bbb_sorter.sv \
  rtl/twb_controller.sv rtl/twb_sorter.sv rtl/vlsi_sort_top.sv \
  tb/tb_vlsi_sort_top.sv --top-module tb_vlsi_sort_top
./obj_dir/Vtb_vlsi_sort_top
```

What the testbenches check:

- **`tb_matrix_comparator`:** random key pairs, equal pairs and pairs that
  differ in one bit or one row, in both directions, back to back; the R+1
  latency.
- **`tb_oet_sorter`:** random sets in both directions, one every S clocks;
  the latency.
- **`tb_matrix_comparator_r2s8`, `tb_matrix_comparator_r8s2`,
  `tb_oet_sorter_r2s8`:** the same tests on non-square keys (2 x 8 and
  8 x 2 bits; 6 keys of 2 x 8 bits for S). The comparator works for any
  R x S matrix: it has R x R cells, latency R+1 and period S. The number of
  columns S sets the period, the number of rows R sets the area.
- **`tb_shift_memory`:** order, flags and counts under random push/pop.
- **`tb_tosi_array`:** TOSI(2, 8) on a 4 x 8 array and four more tile
  sizes on an 8 x 8 array; the 1 + s/2 + 2r clock count.
- **`tb_sema`:** K = 16 and K = 64; the tile contents and the clock count.
- **`tb_bbb_controller`** (with a delay line standing in for S),
  **`tb_bbb_sorter`:**
  - pass count and length;
  - the loop variables against the loop nest;
  - the final order.
- **`tb_twb_controller`:** the controller against a block-level model of
  the memories and S.
  - Whole blocks are read from the memory it selects.
  - Each run is read completely.
  - Output blocks are in order.
  - Merge and pass counts match.
- **`tb_twb_sorter`:** the board with random, equal-heavy, sorted and
  reversed inputs; sort-split counts, merge times and the whole-sort time
  ((M-1) * 2^M + 1) * TS + (2^M - 1) * 2S.
- **`tb_vlsi_sort_top`:** the whole sorter at its default parameters, eight
  rounds on the two boards. A producer and a consumer run concurrently, so
  input of one round overlaps the sort of the previous one. It counts:
  - SEMA transforms;
  - words staged into X0 and X1, and moved into M00 and M01;
  - input clocks that overlap a sort;
  - ascending and descending sort-splits;
  - writes into each output memory;
  - memory swaps;
  - TWB sort-splits and source switches.

  It fails if any of these never happens.

All testbenches pass with verilator 5. The design also elaborates and
synthesises in yosys. Synthesis reports unused-signal warnings: the `full`
and `count` outputs of the memories, and the flags of all but one
comparator per stage in `oet_sorter`. These signals are unused by design.
