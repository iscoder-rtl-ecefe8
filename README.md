# iSCoder RTL: genomic-data compression kernels computed inside SRAM

MPEG-G compression of sequencing data spends most of its time in two small
kernels:

- **MatchC** finds, for every position of a symbol stream, the longest run of
  symbols that also occurs in the 256 symbols before it. It emits a
  `(length, pointer)` pair and skips ahead by `length`.
- **LutC** codes each quality-score symbol by its position inside a
  128-entry lookup-table row. The row is chosen by the two symbols before it.

Both kernels are searches: "which stored strings equal this one?" This design
runs them in SRAM arrays that work as content-addressable memories (CAMs).
Every array compares one 8-bit symbol against all of its columns, or all of
its rows, in one cycle. A small peripheral under the array turns those raw
match vectors into lengths and positions. The same 128 KB arrays serve both
kernels. Only the data layout and the controller in front of the arrays
change.

The RTL describes 256 such arrays, grouped as 16 clusters of 16. In MatchC
mode every array is an independent engine (256 engines). In LutC mode the 16
arrays of a cluster together hold the whole lookup table and form one engine
(16 engines).

## The array and its peripheral (`sram_acc`)

An array has 2048 rows and 512 columns. A column holds 256 symbols of 8 bits.
Symbol slot `g` occupies rows `8g .. 8g+7`, and row `8g` holds the
**most significant** bit.

The row driver (`row_driver`) turns `(group address, symbol)` into bit-line
codes:

- a `1` bit is driven as `10` and matches a stored 1;
- a `0` bit is driven as `01` and matches a stored 0;
- every row outside the addressed group gets `00`, which means "don't care".

Only 8 rows are driven in any cycle. Each column's match line is the AND over
its driven rows. A second row driver drives 8 *columns* (one of 64 column
slots) instead. This gives the transposed search that LutC uses: one match
bit per row.

The peripheral (`acc_peripheral`) keeps per column:

- a flip-flop holding the previous cycle's match bit. The new result is ANDed
  with it, so a match of L symbols is built one byte per cycle;
- a **mask** bit vector that selects the 256 columns forming the current
  window;
- an OR-reduce `hit` that tells whether any masked column still matches;
- a length counter and a pointer register;
- a FindPos tree that returns the highest-index surviving column.

For LutC it has 16 FindPos trees of 128 entries, one per group of 128 rows.
Their results are registered, so they are ready one cycle after the search.

FindPos is "rightmost 1" = highest index. In MatchC this picks the latest
window start among equally long matches, which is what a plain software scan
with `>=` picks too.

## MatchC: preload and mask (`matchc_ctrl`)

Column `c` of an array holds the 256 symbols that start at block position
`fb + c`. Seen across one row group, the columns therefore hold 512
consecutive window starts. The mask marks 256 of them (columns `s..s+255`) as
the current window, and the position being coded is `i = fb + s + 256`.

One iteration works like this:

- cycle R byte-searches row group R with symbol `block[i+R]`;
- the AND through the column flip-flops keeps only the columns that have
  matched on every cycle so far;
- the iteration stops in the first cycle with no masked hit, at 255 matched
  symbols, or at the end of the block;
- it emits `length` (the number of hit cycles) and `pointer` (the FindPos
  column minus `s`, so 0..255 within the window; the match starts 256 −
  pointer symbols back);
- it advances `i` by `max(length, 1)`.

An iteration with length L therefore takes L + 1 cycles.

The next window needs no data movement as long as it still lies inside the
512 columns: the mask just shifts toward higher columns by the advance. Only
when it would run off column 511 does the controller rewrite all 512 columns
from the new start, one column per cycle (512 cycles). The first fill is also
512 cycles. Coding starts at `i = 256`: the first 256 symbols of a block are
window only.

Example from the cluster test: 16 blocks coded in parallel took 3156 cycles,
refreshes included.

## LutC: hybrid table layout and the tuple scheduler

LutC codes symbol `k` (k ≥ 2) through the tuple
`(addr1, addr2, sym) = (s[k-2], s[k-1], s[k])`. Symbols are 7 bits. The
result is the position of `sym` in table row `(addr1, addr2)`. The first two
symbols of a block are copied through unchanged.

**Layout.** The 128 `addr1` tables are spread over the 16 arrays of a
cluster, 8 per array:

- `addr1` is first remapped to `newID` (`addr1_remap`);
- the table goes to array `newID / 8`, block `newID % 8`;
- inside a block, entry `j` of row `addr2` sits in column slot
  `(newID % 8) * 8 + addr2 / 16`, at physical row `(addr2 % 16) * 128 + j`.

One transposed search of a slot with `sym` therefore answers 16 different
`addr2` rows at once (16 lanes), for one `addr1`.

**Remap.** Real quality scores concentrate on `addr1` values 28..43. The remap
sends these 16 hot tables to 16 different arrays:

| addr1 | newID |
|---|---|
| 28..43 | (addr1 − 28) × 8 |
| 96 | 33 |
| other multiples of 8 | addr1 / 8 + 28 |
| everything else | unchanged |

The published mapping pairs 33 with 96 the other way round (33 → 96). That
would give 33 and 40 the same slot and leave slot 33 empty, so this RTL uses
the direction that makes the map a permutation. `tb_addr1_remap` checks that
the map is a permutation.

**Scheduler** (`tuple_scheduler`). A batch of N = 16 tuples is loaded, and
each cycle every array is offered at most one search. For each array, the
scheduler looks at the pending tuples that belong to that array. It groups the
ones with equal `(newID, addr2/16, sym)`, because one search answers all of
them, and issues the largest group (ties go to the lowest tuple index). Other
tuples for a busy array wait. A new batch is loaded only when the whole batch
has been issued.

Example: with tuples (31,35,35), (35,35,35), (35,35,37) and (35,37,37):

- the first tuple goes to array 3;
- the last two share one search on array 7;
- (35,35,35) waits one cycle.

Requests pass through a 4-entry FIFO per array. Each request carries its tuple
mask and lane numbers, so the result selector knows which lanes of the answer
to keep.

**Result selector.** Results are written to the 16 output banks:

- MatchC results of array `a` go to bank `a` at consecutive addresses as
  `{length[7:0], pointer[7:0]}`.
- The LutC result of symbol `k` goes to bank `k % 16`, address `k / 16`, as
  `{miss, 8'b0, pos[6:0]}`.
- The two copied head symbols go to addresses 0 of banks 0 and 1.

In the cluster test, 698 LutC symbols took 195 cycles: 101 tuples had to wait
and 5 searches were shared.

## Structure

```
iscoder_top            16 clusters, shared mode/start, host port with cluster selects
└─ iscoder_cluster     one cluster (16 MatchC engines or 1 LutC engine)
   ├─ scratchpad_in    16 input banks x 4096 symbols, 256-symbol window read per bank
   ├─ matchc_ctrl x16  MatchC sequencer per array
   ├─ lutc_ctrl        LutC block walker: head symbols, batches of 16 tuples
   ├─ tuple_scheduler  arbiter + crossbar (uses addr1_remap per tuple)
   ├─ sync_fifo x16    request FIFO per array
   ├─ sram_acc x16     row_driver x2, cam_array, acc_peripheral (findpos_tree x17)
   ├─ result_selector  files MatchC / LutC results into output banks
   └─ scratchpad_out   16 output banks x 4096 words of 16 bits
iscoder_pkg            sizes, command/mode enums, tuple and request structs
```

**Host port** (`iscoder_top`):

- Select the mode.
- Write input symbols: cluster, bank, address.
- Write block lengths per bank (LutC uses bank 0).
- For LutC, write table rows: cluster, array, 11-bit row, 512-bit data. This
  is allowed only while idle.
- Pulse `start` and wait for `done`.
- Read results. Output reads have one cycle of latency.
- `cnt_rd_*` returns how many MatchC results a bank holds. `l_written` counts
  LutC words.

All resets are synchronous and active low.

## How far to trust it; where it departs from the published design

- Off-chip DRAM and the data movers between it and the scratchpads are not
  modelled. The host port stands in for them.
- The SRAM is modelled as a bit array with ideal match lines. There is no
  precharge, no sense amplifiers, and no limit on simultaneously active rows
  beyond the design always driving 8.
- The `11` (write/read) bit-line code and a shifter drawn beside the address
  decoder are not modelled. Writes use dedicated row and column write ports:
  one 512-bit row or one 2048-bit column per cycle.
- MatchC output: the published algorithm exists in two versions, one emitting
  the window column and one emitting a distance `i − start`. This RTL emits
  the column (0..255). The distance is `256 − pointer`.
- A block longer than the scratchpad (4096 symbols per bank, 13-bit positions)
  must be cut by the host. Each piece restarts its window.
- These are choices of this design, not published values:
  - scratchpad sizes;
  - FIFO depth;
  - output word formats;
  - the scheduler's tie-break;
  - the advance of 1 after a zero-length match;
  - the refresh cost.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/iscoder_pkg.sv \
          tb/tb_iscoder_cluster.sv --top-module tb_iscoder_cluster
./obj_dir/Vtb_iscoder_cluster
```

The testbenches generate their own data. `tb/iscoder_tb_model.svh` holds the
software reference models: a direct MatchC scan, the remap, and a synthetic
lookup table `T[a1][a2][j] = (5j + 3·a1 + 7·a2) mod 128`. Each tuple is
checked against this table.

`tb_iscoder_cluster` runs both modes on one cluster and counts every
mechanism:

- refresh;
- mask shift;
- zero-length step;
- capped match;
- scheduler wait;
- shared search;
- mode switch.

`tb_iscoder_top` does the same through the top-level host port, with 2 of
the 16 clusters (32 of the 256 arrays); all other parameters are at their
defaults. That is the largest configuration simulated. The full 256-array top
has been linted and elaborated but not simulated: its Verilator build alone
runs for most of an hour. The clusters are identical copies, so the 2-cluster
run exercises everything except the wider cluster-select decode.
