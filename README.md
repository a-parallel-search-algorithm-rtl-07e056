# Parallel bit-serial k-winners-take-all (kWTA) engine

This engine finds the K largest of N unsigned numbers. It does not sort and it does not scan the
inputs one by one. Every input is examined at once, one bit position per clock, starting at the MSB.
The cost of a search is therefore set by the data width, not by the number of inputs: at most
`M_BITS + LEVELS` clock cycles. The only part whose delay grows with N is a counter of ones, and here
that counter is a tree, so its delay grows with log N.

The default build holds 1024 inputs of 32 bits and selects K = 5 winners. Its counting tree has
three levels, 16 × 8 × 8. A search takes at most 35 cycles. At the 8.3 ns clock reported for this
configuration in a 0.13 µm process, that is about 290 ns.

The algorithm and the circuit organisation follow M. Yoon, "A Parallel Search Algorithm and Its
Implementation for Digital k-Winners-Take-All Circuit". The RTL here is an independent
implementation. Where it departs from that description is listed below.

## The search, bit by bit

Each input is in one of three states:

* **winner**: it is certainly among the K largest;
* **competitor**: it is still undecided;
* **loser**: it is certainly not among the K largest.

At the start every input is a competitor and there are no winners (`nW = 0`). In each bit cycle the
engine looks at the current bit of every competitor. Competitors whose bit is 1 are *top dogs* and
the others are *underdogs*. The engine counts the top dogs and forms `DET = n(T) + nW`:

| DET      | meaning                                        | action                                                                      |
|----------|------------------------------------------------|-----------------------------------------------------------------------------|
| `< K`    | all top dogs fit among the K largest           | top dogs become winners, `nW <= DET`, underdogs stay competitors (`LTK` = 1) |
| `== K`   | the top dogs complete the set                  | top dogs become winners, the search ends                                     |
| `> K`    | too many top dogs                              | underdogs become losers, top dogs stay competitors                           |

In every case the vectors C (competitor) and W (winner) are updated for all N inputs in parallel.
The only global quantity is the count `n(T)`.

Suppose the LSB has been examined and `DET` is still above K. Then the remaining competitors all
hold the same value, and `K - nW` of them must be picked. The engine picks the lowest-indexed ones.
This is the *tie phase* (see below).

Example with K = 2 and the 3-bit values `{5, 7, 3, 5}` (inputs 0..3):

| bit | competitors | T (bit = 1)  | DET       | result                             |
|-----|-------------|--------------|-----------|------------------------------------|
| 2   | {0,1,2,3}   | {0,1,3}      | 3 > 2     | input 2 loses                      |
| 1   | {0,1,3}     | {1}          | 1 < 2     | input 1 wins, nW = 1               |
| 0   | {0,3}       | {0,3}        | 3 > 2     | both stay competitors              |
| tie | {0,3}       | -            | -         | lowest index wins: input 0         |

The winners are inputs 1 and 0.

## Datapath organisation

The engine has three parts:

```
 start ──► kwta_counter ── busy, m (tie phase), tie_lvl ─────────┐
                                                                  ▼
 d[N] (bit-slice, MSB first) ──► kwta_cg ── T[N], C[N] ──► kwta_wd ──► w[N], done
                                   ▲                              │
                                   └──────── ltk, keep[N] ◄───────┘
```

* **Competition-state generator (`kwta_cg`)**: one independent cell per input. Each cell registers
  the incoming bit and holds the competitor flag C, which START presets to 1. The cell forms
  `T = C & (D | M)`. At the end of each cycle it sets C to `C ^ T` when `ltk` is 1 (the underdogs
  keep competing) and to `T` otherwise. The result is ANDed with `keep`, a mask that only the tie
  phase uses. In the tie phase M is 1, so `T = C`.
* **Winner decision (`kwta_wd`)**: the counting tree (`kwta_winner_counter`), the tie breaker
  (`kwta_tie_breaker`), the set-only winner flags W, the nW register and DONE.
* **Counter (`kwta_counter`)**: START clears it and it advances every busy cycle. After `M_BITS`
  cycles it raises M and then steps `tie_lvl` from `LEVELS-1` down to 0. A finish from the winner
  decision stops it.

## Counting with saturation: the zero-worm and Σ-circuits

The tree never needs the exact value of `n(T)`. It only needs to know where `n(T) + nW` lies relative
to K. All partial counts are therefore *count bundles* of `1 + ceil(log2(K+1))` lines (4 lines for
K = 5):

* an overflow line that means "more than K";
* a binary count 0..K, which is valid only while the overflow line is clear.

**1-counter (`kwta_one_counter`)**: a block of N1 inputs with K+1 vertical paths `p_0..p_K`. A marker
(the "worm") enters at the bottom on the path given by a start count. It climbs one row per input.
On a row where `T_i = 1` it moves one path to the right. If it moves right from `p_K`, it leaves the
array, which means overflow. The path it ends on is `start + n(T)`, saturated. In RTL the worm is a
one-hot vector of K+2 positions that shifts once for each 1. The original circuit is an array of
two-transistor multiplexers with the same function.

The worm also solves the tie within a block. Row i is *selected* if `T_i = 1` and the worm is still
left of `p_K` when it reaches that row. The lowest rows are served first, so exactly the
lowest-indexed `K - start` ones are selected.

**Σ-circuit (`kwta_sigma`)**: a saturating adder of two count bundles.

**Accumulator (`kwta_accumulator`)**: a chain of L Σ-circuits. It adds the counts of L child blocks,
child 0 first, onto a chain input.

**Tree (`kwta_winner_counter`)**: N/N1 1-counters at level 0, then `LEVELS-1` levels of
accumulators with L children each, so `N = N1 · L^(LEVELS-1)`. The stored nW enters the sum at the
top, as the chain input of the top accumulator. With `LEVELS = 1` there is a single 1-counter and nW
is the worm's entry path; this is the single-level form, suited to small N. `DET` is the count at the
top of the tree.

## Tie breaking, one tree level per cycle

This is the least obvious part of the design. After the last bit, the competitors all hold the same
value, and the lowest-indexed `K - nW` of them must win. With a single 1-counter this takes one
cycle: the worm enters at nW and its row selections are the answer. With a deeper tree, a global
"lowest-indexed" choice would need a prefix count across the whole tree in one cycle. Instead, the
engine walks down the tree, one level per cycle, starting at the top (`tie_lvl = LEVELS-1`):

1. In the tie phase M forces `T = C`, so the tree counts the competitors.
2. The accumulators of the level being resolved take nW as their chain input. Their running sums
   `s_c` (nW plus the counts of children 0..c) classify each child block:
   * **full** (`s_c ≤ K`): all its competitors become winners;
   * **boundary** (`s_(c-1) < K < s_c`): it keeps its competitors, and nW becomes `s_(c-1)`;
   * otherwise: its competitors drop out (`keep = 0`).
3. If the level has no boundary block, the winners now number exactly K and the search ends early.
4. At level 0 the 1-counters' worms enter at nW and select the last `K - nW` rows. The search ends.

After the top level, only one block at each lower level still holds competitors. Every block of
that level can therefore be given the same nW, and the boundary bases can simply be ORed together.
A tie search takes between 1 and LEVELS cycles, so the worst case for a whole search is
`M_BITS + LEVELS` cycles (35 for the default build). The result is the same as a global
lowest-index-first choice.

## Interface and timing (`kwta_top`)

| port    | dir | width | meaning                                                          |
|---------|-----|-------|------------------------------------------------------------------|
| `clk`   | in  | 1     | clock                                                            |
| `rst_n` | in  | 1     | asynchronous reset, active low                                   |
| `start` | in  | 1     | one-cycle pulse; restarts a running search                       |
| `d`     | in  | N     | bit-slice: `d[i]` is the current bit of input i                  |
| `busy`  | out | 1     | a search is running                                              |
| `done`  | out | 1     | `w` holds the result; stays high until the next `start`          |
| `w`     | out | N     | winner flags; exactly K are set when `done` is high              |

Drive bit `M_BITS-1` of every input on `d` in the same cycle as `start`. Then drive one lower bit per
cycle. Bits after bit 0 are ignored. Busy cycle c (counting from 0, the cycle after `start`)
examines bit `M_BITS-1-c`. Suppose the search ends in busy cycle c. Then `done` and the final `w`
appear after that clock edge, which is c+1 edges after the `start` edge. `busy` falls at the same
edge. N must be larger than K; an elaboration-time assertion checks this.

| parameter | default | meaning                                                  |
|-----------|---------|----------------------------------------------------------|
| `M_BITS`  | 32      | data width m                                             |
| `K`       | 5       | number of winners                                        |
| `N1`      | 16      | inputs per 1-counter                                     |
| `L`       | 8       | children per accumulator                                 |
| `LEVELS`  | 3       | tree levels h (1 = single-level)                         |
| `N`       | 1024    | derived: `N1 · L^(LEVELS-1)`                             |

Other tree shapes are chosen with the parameters, for example `N1=16, L=4, LEVELS=2` for 64 inputs
or `N1=32, L=8, LEVELS=3` for 2048. To balance the delay of a 1-counter against that of an
accumulator, choose L near `N1 / (1 + ceil(log2(K+1)))`. For larger N the best shapes drift above
that value (16 × 8 × 8 for 1024 inputs).

## Where this RTL departs from the circuit it models

* The counting tree is described at logic level. The original is built from pass-transistor
  multiplexer arrays whose delay sets the clock period. The RTL has the same function and cycle
  count, but its timing depends on synthesis.
* The winner count nW is stored as a binary count bundle. The original keeps it as a one-cold
  pattern in one flip-flop per worm path.
* Top dogs, not all competitors, become winners when `DET ≤ K`. This is the intended behaviour of
  the algorithm; a literal `W = W | C` at that step would be wrong.
* Each accumulator has L Σ-circuits, and the chain is seeded with 0 (lower levels) or nW (top). A
  lower-level accumulator could omit its first Σ-circuit and start from child 0. That saves area and
  leaves the function unchanged.
* The level-by-level tie breaker for trees deeper than one level, the `keep` mask it drives into
  the generator, and the tie-phase outputs of the tree are this design's own construction. They
  match the stated cost of about one cycle per tree level. Ties always go to the lowest index; the
  alternative rule (highest index first) is not provided.
* `rst_n`, `busy`, and DONE holding until the next START are additions to the START/DONE interface.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with values computed
independently, using plain integer arithmetic. Each testbench prints
`TB_RESULT checks=N failures=M`.

| testbench                  | what it checks                                                                    |
|----------------------------|-----------------------------------------------------------------------------------|
| `tb_kwta_sigma`            | all operand pairs, K = 5 and K = 7                                                |
| `tb_kwta_one_counter`      | counts and tie selections for every entry path, random T                          |
| `tb_kwta_accumulator`      | chain sum, full/boundary flags, boundary base                                     |
| `tb_kwta_winner_counter`   | DET and all per-level tie outputs of a 3-level, 16-input tree                     |
| `tb_kwta_tie_breaker`      | selection per tie level                                                           |
| `tb_kwta_counter`          | M and tie-level timing, stop on finish, restart                                   |
| `tb_kwta_cg`               | state update rule against a bit-vector model                                      |
| `tb_kwta_wd`               | LTK/finish every bit cycle and final winners, with a behavioural generator        |
| `tb_kwta_top`              | 1200 random searches on four small shapes, including exact cycle counts and coverage of every mechanism |
| `tb_kwta_top_full`         | the default 1024 × 32-bit, K = 5 build: all-equal data (exactly 35 cycles), random data, 3-valued data, tie settled at the top level |
| `tb_kwta_table1`           | every tree shape of the published k = 5 clock-period table (1-level 8..4096, 2-level 16×4..128×32, 3-level 8×4×4..64×8×8) with 32-bit data, plus K = 20 on 16×8×8; worst case reached exactly `32 + LEVELS` cycles in each |

`tb_kwta_top` uses `kwta_top_harness`. Its reference model replays the search on integers to
predict the winners and the exact number of cycles. It also requires each of the following to
happen at least once: DET above, below and equal to K; a tie in a single-level tree and in deeper
trees; a tie settled above the 1-counters; a tie settled in them.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/kwta_pkg.sv tb/tb_kwta_top.sv --top-module tb_kwta_top -o sim
./obj_dir/sim
```

For a lint check only, use
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/kwta_pkg.sv rtl/kwta_top.sv`. It reports
one style warning (SYNCASYNCNET): `rst_n` is both the asynchronous reset and the `disable iff`
condition of the assertion in `kwta_wd` that a finished search holds exactly K winners.

## Files

| file                          | content                                        |
|-------------------------------|------------------------------------------------|
| `rtl/kwta_pkg.sv`             | count-bundle width, integer power              |
| `rtl/kwta_top.sv`             | the engine                                     |
| `rtl/kwta_counter.sv`         | cycle counter, M and tie level                 |
| `rtl/kwta_cg.sv`              | competition-state generator                    |
| `rtl/kwta_wd.sv`              | winner decision                                |
| `rtl/kwta_winner_counter.sv`  | counting tree                                  |
| `rtl/kwta_one_counter.sv`     | zero-worm 1-counter                            |
| `rtl/kwta_accumulator.sv`     | chain of Σ-circuits                            |
| `rtl/kwta_sigma.sv`           | saturating count adder                         |
| `rtl/kwta_tie_breaker.sv`     | level-by-level tie resolution                  |
