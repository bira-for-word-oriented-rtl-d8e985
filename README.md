# Built-in repair analyzer with optimal repair rate, single test

A memory array with spare rows and spare columns can be repaired when every
faulty cell lies on a row or a column that is replaced by a spare. Choosing
which rows and columns to replace is the spare allocation problem. This RTL
solves it on chip and exactly: it finds the repair that uses the fewest spare
elements, or reports that none exists. The memory is tested only once.

The analyzer follows the scheme of C. Bhaskar and K. Jeyaprakasam, "BIRA for
Word Oriented Memories Using Parallel Prefix Algorithm" (IJAREEE, 2013). It
works in two phases:

1. **During the test**, a must-repair analyzer (MRA) watches the fault
   addresses that the BIST engine reports, one per clock cycle. It commits
   every row or column that has to be replaced whatever else is done. It
   stores the remaining faults in a small CAM, the *fault-list*.
2. **After the test**, the SOLVER runs an exhaustive but short search over
   *repair strategies*. A combinational *k-subset enumerator* produces the
   strategies, one per cycle when needed. The SOLVER keeps the cheapest
   strategy that works.

The default configuration has four spare rows and four spare columns on a
bit-oriented array. That is the configuration of the published
implementation. A parameter switches the analyzer to three kinds of
word-oriented memory (types A, B and C, described below).

## Phase 1: must-repair analysis (`bira_mra`)

The MRA holds two pairs of CAMs (`bira_cam`):

| CAM | entries (R spare rows, C spare columns) | holds |
|---|---|---|
| fault-list, row and column | 2·R·C each (32 for 4/4) | stored faults (row, column) |
| solution record, row | R | spare rows allocated |
| solution record, column | C | spare columns allocated |

The valid bits of the solution record are the **L registers**. They fill from
the bottom, so they also point at the next free entry. For each incoming
fault the MRA decides, in the same cycle:

* **Covered.** The row or column of the fault is already in the solution
  record. The fault is dropped (`r_covered`, `c_covered`).
* **Repeated.** The same (row, column) is already in the fault-list. The
  fault is dropped.
* **Row must-repair.** The fault-list already holds as many uncovered faults
  on this row as there are free spare columns. With the new fault, columns
  alone can no longer repair the row, so the row goes into the solution
  record (`r_mustrepair`). A parallel counter (`parallel_counter`, an adder
  tree) counts the matches.
* **Column must-repair.** The same test, for the column against the free
  spare rows. A row and a column can both become must-repair on one fault,
  and both are written in that cycle.
* **Otherwise** the fault is appended to the fault-list.
* **Unrepairable.** A must-repair with no spare of that kind left, or a full
  fault-list, sets `early_unrepairable`. The BIST may stop there.

A *cover vector* has one bit per fault-list entry. The bit is set when the
entry's row or column is in the solution record. Whenever an address is
written into the solution record, the same CAM search that checked the
incoming fault also updates the cover vector. The must-repair counts include
only uncovered entries. A fault stored before its row became must-repair
therefore no longer counts against its column.

The bound 2·R·C on the fault-list size works as follows. Once must-repairs
are applied, every row that ends up repaired by a row spare holds at most C
stored faults. Every column that ends up repaired by a column spare holds at
most R. Any further fault proves the array unrepairable.

## Phase 2: the search (`bira_solver`, `ksubset_enum`)

### Repair strategies

Suppose Rf spare rows and Cf spare columns are still free after phase 1, and
let L = Rf + Cf. A **repair strategy** is an L-bit word with exactly Rf
ones. It is evaluated by walking the fault-list. Whenever a fault is found
that the current solution does not cover, the next unused strategy bit
decides how to repair it: 1 means its row takes a spare row, 0 means its
column takes a spare column. Every minimal repair is produced by at least one
such word. Trying all C(L, Rf) words is therefore an exact search. With four
and four spares and no must-repairs, that is C(8,4) = 70 strategies.

### One strategy, cycle by cycle

On `bist_done` the MRA copies the L registers and the cover vector into save
registers (`save`). The SOLVER then loads the first strategy, the Rf low
ones. In each cycle of `S_EVAL`:

* The MRA presents the **first uncovered fault** of the fault-list
  (`cur_row`, `cur_col`). It finds it with a priority encoder over the
  uncovered entries, so covered entries cost no cycle.
* If nothing is uncovered, the strategy repairs the array. If its cost
  (spares used, including must-repairs) is below the best cost so far
  (`better`), the strategy and its cost become the best.
* If faults remain and either `better` has dropped or all L strategy bits
  are used, the strategy is abandoned.
* Otherwise `r_insert` or `c_insert` writes the fault's row or column into
  the solution record. In the same cycle the matching fault-list entries are
  marked covered.
* Ending a strategy asserts `restart`. The MRA restores the saved state, and
  the next strategy from the enumerator is loaded in the same cycle.

So one strategy costs at most L + 1 cycles. Only the best strategy is
stored, not its solution, which keeps the solution record single. After the
last strategy the SOLVER therefore runs the best strategy once more
(`S_REBUILD`) so that the solution record holds its rows and columns. Then
`done` rises.

### The k-subset enumerator

`ksubset_enum` maps a strategy word x to the next larger word of the same
weight within L bits, in one combinational step. It uses three steps built
from two parallel prefix networks (`ks_prefix`):

1. **Lowest one.** A prefix OR gives, for each bit, whether any lower bit is
   set. `y = x & ~(prefix_or << 1)` isolates the lowest one.
2. **Increment the lowest run.** `s = x + y`, with carries from a second
   prefix network (generate `x & y`, propagate `x ^ y`). The lowest run of
   ones is cleared and the bit above it is set.
3. **Pack the rest of the run.** `x & ~s` is the cleared run. Shifted right
   by (position of y) + 1 with a log₂N-stage shifter, it leaves the
   remaining ones at the bottom.

The next word is `s | packed run`. Example: x = 0110 gives y = 0010,
s = 1000, run = 0110, packed run = 0001, next = 1001. `last` rises when x
is zero (Rf = 0) or when the next word would use a bit at or above L.

`STYLE = 0` builds both prefix networks as Kogge-Stone (log₂N levels), as
the published implementation does. `STYLE = 1` builds a serial chain, which
is smaller and slower. The results are identical.

## Word-oriented memories (`word_fault_adapter`, `bira_mra_c`)

For a word-oriented memory the BIST reports a triplet: row, column address,
and syndrome S (read data XOR expected data, one bit per bit of the word).
Set `MEM_TYPE` on `bira_top`:

* **`MEM_BIT`** (default): bit-oriented. S only has to be nonzero.
* **`MEM_TYPE_A`**: a spare column *group* replaces one column address in
  every bit group at once. This is the bit-oriented problem, so S is dropped.
* **`MEM_TYPE_B`**: each spare column replaces one bit position of one
  column address. The column address is extended by the bit index to form a
  *virtual column* `{column, bit}`. A word failing in more than one bit
  forces its row to must-repair, because only one column per word can be
  replaced.
* **`MEM_TYPE_C`**: any spare column can replace any bit of any word. Here
  one triplet can carry several faults, and they must still be taken one per
  cycle. `bira_mra_c` replaces the adapter and MRA. Its fault-list stores
  *extended fault addresses* (row, column address, failing-bit mask). A
  repeat of the same word is merged into its entry. Cover state is kept per
  bit. The must-repair rules are those of the bit-oriented MRA, applied to
  virtual columns and to the count of failing bits per row. Several virtual
  columns, and the row, can be committed in one cycle. In the final phase
  `c_insert` repairs the lowest uncovered bit of the first uncovered entry.
  The same SOLVER drives it unchanged.

For types B and C, `rep_cols` holds virtual columns: `{column, bit index}`.

## Interface of `bira_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `start` | in | 1 | one-cycle pulse before a test: clears the analyzer |
| `bist_valid`, `bist_row`, `bist_col`, `bist_syn` | in | 1, ROW_W, COL_W, W | one fault or triplet per cycle |
| `bist_done` | in | 1 | one-cycle pulse after the last fault |
| `early_unrepairable` | out | 1 | unrepairable already known during the test |
| `done`, `repairable` | out | 1 | result valid / a repair exists |
| `rep_rows`, `rep_row_valid` | out | R×ROW_W, R | spare rows to program |
| `rep_cols`, `rep_col_valid` | out | C×VCOL_W, C | spare columns to program |
| `rep_cost` | out | ⌈log₂(R+C+2)⌉ | number of spares used |

Parameters: `R`, `C` (spares, default 4/4), `ROW_W` = 10 and `COL_W` = 8
(address widths), `W` = 8 (word width), `MEM_TYPE`, `STYLE`. The published
implementation does not give address or word widths; these defaults are this
design's choice.

**Timing.** Faults are accepted at full speed. A fault affects the decision
on the next cycle's fault. Measured from the edge that samples `bist_done`
to the edge that raises `done`, the final analysis takes at most
1 + C(L, Rf)·(L+1) + (L+1) cycles. If `early_unrepairable` is already set,
it takes one cycle. Worst case, with no must-repairs:

| spares r/c | fault-list entries (row + col) | solution record | worst-case cycles, this RTL | published figure |
|---|---|---|---|---|
| 2/2 | 8 + 8 | 2 + 2 | 36 | 34 |
| 3/3 | 18 + 18 | 3 + 3 | 148 | 146 |
| 4/1 | 8 + 8 | 4 + 1 | 37 | 35 |
| 4/4 | 32 + 32 | 4 + 4 | 640 | 638 |
| 5/5 | 50 + 50 | 5 + 5 | 2784 | 2782 |

The CAM sizes match the published ones. The cycle counts are measured in
simulation on the diagonal fault map, where every strategy runs to its full
length. They are two cycles above the published figures: one to load the
first strategy and one to end the rebuild pass.

## Where this RTL departs from the published design, and what it adds

* **CAMs are flip-flops and comparators.** The published CAMs are custom
  cells with a 1.7 ns read at 400 MHz in 130 nm. Their reported 94
  flip-flops exclude the CAMs. With the 4/4 default, this RTL has about
  830 flip-flop bits, almost all in the CAMs.
* **Skipping covered faults.** The published text has the MRA read the
  fault-list in order and check each entry. Here, covered entries are
  skipped through the cover vector, so a strategy costs at most L + 1
  cycles. Without this, the published worst-case times could not be met.
* **Design choices the published description leaves open:**
  * counting only uncovered entries for must-repair;
  * the ≥ comparison of the must-repair threshold;
  * dropping repeated faults;
  * the strategy bit order and the enumeration order;
  * the rebuild pass;
  * the prefix formulation of the enumerator;
  * dropping triplets with S = 0.
* **Type B.** The "one column per word" rule is enforced only by forcing
  must-repair rows for multi-bit words, as published. Two single-bit faults
  in different rows, on different bits of the same column address, may
  still be assigned two spare columns on that address.
* **Type C.** Only the idea is published: extended addresses, with faults
  of one word merged. The counting and merge rules of `bira_mra_c` are this
  design's own. A "pre-computation CAM" is named in the published abstract
  but not described, and is not built.
* **Memories that allow k > 1 replaced columns per word** (between types B
  and C) have no analyzer of their own here; type C covers the unrestricted
  case.
* **Not included.** The BIST engine and the memory's own column repair
  multiplexers belong to the system around the analyzer. The top-level ports
  connect to them.

## Files

| file | content |
|---|---|
| `rtl/bira_pkg.sv` | memory-type and SOLVER-state enums |
| `rtl/bira_cam.sv` | CAM with valid bits, restore and clear |
| `rtl/parallel_counter.sv` | adder-tree population count |
| `rtl/ks_prefix.sv` | prefix network over (generate, propagate): Kogge-Stone or serial |
| `rtl/ksubset_enum.sv` | next constant-weight vector |
| `rtl/bira_mra.sv` | must-repair analyzer, bit-oriented and types A/B |
| `rtl/bira_mra_c.sv` | must-repair analyzer with extended fault addresses, type C |
| `rtl/bira_solver.sv` | final-analysis search |
| `rtl/word_fault_adapter.sv` | triplet to fault address, types A/B |
| `rtl/bira_top.sv` | the analyzer |
| `tb/bira_ref_pkg.sv` | brute-force minimum repair cost, used as reference |
| `tb/bira_harness.sv` | end-to-end random and directed tests for one configuration |
| `tb/tb_*.sv` | self-checking testbenches, one per block |

## Verification

Every testbench is self-checking and ends with a
`TB_RESULT checks=N failures=M` line.

* **`tb_bira_top`**: all defaults. 140 fault maps from seven scenarios are
  compared with a brute-force optimum. The scenarios are sparse random,
  overfull row, overfull column, dense or overflowing maps, repeated faults,
  simultaneous row and column must-repair, and the worst-case diagonal. Each
  trial checks repairability, minimal cost, coverage of every fault and the
  cycle bound. Every mechanism must occur at least once: storing,
  row/column/both must-repair, covered drop, repeat drop, early and late
  unrepairable, strategy success, `better` restart, exhausted strategy,
  rebuild.
* **`tb_bira_solver`**: the same checks for 2/2, 3/3, 4/1 and 5/5 spares.
  The 3/3 run uses the serial prefix enumerator (`STYLE = 1`).
* **`tb_bira_top_word`**: types A, B and C with 4/4 spares.
* **Unit tests**:
  * `tb_ksubset_enum`: every length and weight up to 8, both prefix styles.
  * `tb_bira_mra`: directed must-repair, overflow and final-phase protocol.
  * `tb_bira_mra_c`: type C with directed cases. Covers merging of one word's
    failures, row must-repair by bit count, two virtual columns repaired in
    one cycle, and the final-phase bit selection.
  * `tb_bira_cam`, `tb_parallel_counter`, `tb_word_fault_adapter`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bira_pkg.sv tb/bira_ref_pkg.sv \
    tb/tb_bira_top.sv --top-module tb_bira_top -Mdir obj_top
./obj_top/Vtb_bira_top
```

The other testbenches build the same way. Each runs in well under a minute.
