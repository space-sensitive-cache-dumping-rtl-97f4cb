# Tracking updated L2 lines for incremental state dumps

During post-silicon validation, the processor's whole state is dumped off chip
again and again. The next step is to analyse those snapshots offline. The
last-level cache (here the L2) holds most of that state. The off-chip link is
narrow, and the processor must stand still while the cache is read out, so a
full L2 dump is a long stall.

Most lines have not changed since the previous dump. Transfer only the lines
written in between, and the stall shrinks. The obvious record of those lines is one bit per
line. For a 16384-line cache that is 16384 bits of debug-only storage. It
costs about a tenth of the cache area.

This RTL implements two cheaper records. Both are conservative: every
written line is always dumped. The price is that some lines that were *not*
written get dumped too. This excess is called the **overhead**: non-written
lines dumped, as a share of all cache lines.

* **Interval-Table tracker (greedy).** It keeps at most K intervals
  `(start, end)` of consecutive line numbers. When more than K runs of
  written lines exist, neighbouring intervals are merged across the smallest
  gap. Storage is 2·K·log2(N) bits, which barely depends on the cache size. With
  K = 16 and a 16384-line cache, that is 448 bits instead of 16384.
* **t-lines/bit bit-vector.** One bit covers T adjacent lines. Storage
  is N/T bits, and a written line drags its T−1 neighbours into the dump.

The two trackers are alternatives. `cache_dump_top` holds one of each, side by
side, with separate ports. A real system would keep the one that suits its
cache size and area budget. The Interval Table wins for large caches. Below
about 4096 lines, a 4-lines/bit vector is as small and as accurate.

## The greedy interval algorithm

Line numbers run from 0 to N−1. The table holds up to K intervals, which
are kept **sorted by start address** and never overlap. Two kinds of distance
drive every decision. Each is counted as the number of lines in between that
would be dumped without having been written:

* **local gap**: from the new line to the nearest end of the interval
  just below it (`line − end − 1`), or to the start of the interval just
  above it (`start − line − 1`). The smaller of the two is `minLocalGap`.
* **global gap**: between two adjacent stored intervals
  (`start[i+1] − end[i] − 1`). The smallest is `minGlobalGap`, and `g` is the index
  of its left interval.

For each written line:

1. If an interval already contains the line, nothing changes.
2. If `minLocalGap` is 0, extend the neighbouring interval. Do the same if
   the table is full and `minLocalGap ≤ minGlobalGap`. Extending to the
   line costs no more overhead than any merge would.
3. Otherwise, if the table has a free entry, store `(line, line)` in it.
4. Otherwise (table full, and the closest pair of intervals is closer than the
   line is to any interval), merge `I[g]` and `I[g+1]` into one interval.
   That frees an entry, and `(line, line)` goes into it.

Two examples with K = 3 on a 16-line cache. The directed testbench checks both:

| table before | line | minLocal | minGlobal | action | table after |
|---|---|---|---|---|---|
| (0,3) (9,10) (14,15) | 7 | 1 (line 8) | 3 (lines 11–13) | extend (9,10) | (0,3) (7,10) (14,15) |
| (0,2) (5,6) (10,10) | 14 | 3 (lines 11–13) | 2 (lines 3–4) | merge (0,2)+(5,6), insert | (0,6) (10,10) (14,14) |

An online rule cannot know which gaps will fill up later. Two intervals that
are far apart may later become the closest pair, once the lines between them
get written. Merging the closest pair is the greedy choice. Because caches show
strong spatial locality, it stays close to the best possible set of K
intervals, which can only be computed offline. That offline computation is not
part of this RTL.

## Hardware organisation of the greedy tracker

```
 upd_line ──► update_buffer ──► greedy_controller ──select──► interval_demux
 busy ◄──────────(full | dump)      │    ▲                     │   │   │
 dump ──────────────────────────────┘    │           scan ◄────┘   │   └──► dumping_logic ──► l2_req_*
                                         │   check_interval         │
          interval_table (K × {start,end}) min_local_gap            ▼
          read port ─► demux               min_global_gap       merge_logic ──► table write port
```

| module | role |
|---|---|
| `update_buffer` | FIFO (default 4 entries) of written line numbers. It lets the processor continue while the controller is busy. |
| `interval_table` | The K intervals in one memory with one asynchronous read port and one synchronous write port. |
| `interval_demux` | Sends the read port to the scan datapath, to the merge logic, or to the dumping logic. |
| `check_interval` | Tests whether the line is inside the interval being read (`hit`), or below it. |
| `min_local_gap` | Locates the line's gap during the scan. It keeps `minLocalGap`, the interval to extend, and the insertion position. |
| `min_global_gap` | Running minimum of the gaps between adjacent intervals, with its index `g`. |
| `merge_logic` | Makes the covering interval `(min start, max end)`, or passes an interval through unchanged when one is moved. |
| `dumping_logic` | Walks the table on a dump and streams every covered line number to the cache. |
| `greedy_controller` | Runs the algorithm and sequences the dump. |

### Cycle budget of one update

The controller reads one interval per cycle. The table is sorted, so the scan
only has to compare each interval with its predecessor. Storing the new
interval can then take one of the following sequences, where `n` is the
number of stored intervals:

| state | cycles | what happens |
|---|---|---|
| SCAN | n (≤ K) | Read `I[0..n−1]` and update both minima. A hit ends the update here. |
| MERGE1 | 1 | Decide. An extension reads, merges and writes back in this same cycle, and the update is done. A global merge reads and holds `I[g]`. |
| MERGE2 | 1 | Read `I[g+1]`, merge it with `I[g]`, and write the result back. |
| SHIFT | m | Move one interval one slot per cycle (read j, write j±1), which opens the slot for the line. |
| SINGLE | 1 | Write `(line, line)`. |

A global merge frees a slot next to the merged pair. The intervals between
that slot and the line's sorted position move into it, so at most K−2
intervals move. The worst case is therefore K + 2 + (K−2) + 1 = **2K + 1
cycles** (33 for K = 16). That bound matches the original design. Inserting
into a table that is not full costs at most 2K cycles, and an extension costs
n + 1.

The next buffered line is taken during the last cycle of the current update,
so updates follow each other without a gap. Starting from idle costs one
extra cycle. The processor only stalls, through `busy`, when all buffer
entries are taken.

### Dump sequence

`dump` (a one-cycle pulse) sets a pending flag, and `busy` rises on the next
cycle. Updates already in the buffer are processed first. `dumping_logic` then
reads each interval in table order and issues its lines in ascending order on
`l2_req_valid/l2_req_line`. Each line is held until the cache raises
`l2_req_ready`, which lets the off-chip link set the pace. The dump takes one
cycle per interval plus one per accepted line. Then `dump_done` pulses, the
table is emptied, and `busy` falls. The processor must not report updates
while `busy` is high. An assertion checks this.

## The t-lines/bit tracker

`tline_bitvector` sets bit `line / T` on every update, in one cycle and without
ever stalling. On `dump` it scans the vector from bit 0, one bit per cycle.
For each set bit it streams the T lines `b·T … b·T+T−1` over the same
valid/ready handshake, and it clears the bit. A dump therefore takes N/T + T·(set
bits) + 1 cycles when the cache is always ready. `busy` covers the whole
dump. T = 1 gives the plain one-bit-per-line vector.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_LINES` | 16384 | Lines in the L2: 2 MB, 8-way, 128-byte lines. The line number width is `$clog2(NUM_LINES)`. |
| `K` | 16 | Intervals in the table. The area/overhead trade-off is tuned here; 4 to 32 is the studied range. |
| `BUF_DEPTH` | 4 | Update Buffer entries. |
| `LINES_PER_BIT` | 4 | T of the bit-vector tracker. It must divide `NUM_LINES`. |
| `LINES_PER_UNIT` | 1 | Granularity of the Interval Table (greedy tracker only). Above 1, the buffer, the table and the gap units hold unit numbers `line / LINES_PER_UNIT`, so each address is shorter. The dump then sends whole units. |

Shared defaults live in `cache_dump_pkg`. All sizes are parameters, and no
other change is needed to build, for example, K = 32 or a 4096-line cache.
At the defaults, synthesis gives the greedy tracker 168 flip-flops and 504
memory bits (table plus buffer). The 4-lines/bit tracker needs 4096 vector bits.

## What follows the original design, and what is added

Taken from the published design:
* The greedy rule.
* The sorted single dual-ported table.
* The abort on a hit.
* Keeping the index of each minimum.
* The merge of two intervals in two cycles.
* Shifting to keep the order.
* The 2K+1 bound.
* The Update Buffer and the Busy, Dump and Reset signals.
* The t-lines/bit mapping.
* The option of tracking groups of lines instead of single lines in the
  Interval Table.
* The default sizes: K = 16, 4 buffer entries, 16384 lines.

Choices made here, where the original is silent:
* **Gap counting.** A gap is the number of non-written lines. The algorithm
  can also be written with distances one larger. Both give the same
  decisions.
* **Ties.** Equal local and global gaps extend the nearest interval. Equal
  local gaps on both sides extend the left interval. Equal global gaps merge
  the leftmost pair.
* **Free table entries.** A line next to an interval (local gap 0) always
  extends it. Otherwise, while the table has a free entry, a line gets an
  entry of its own.
* **Timing.** The read port is asynchronous. The exact split of the merge and
  shift cycles is this design's own, as is taking the next line in the last
  cycle of an update.
* **Interfaces.** The dump protocol: drain the buffer, dump, empty the table,
  with a valid/ready stream to the cache. The De-MUX with three destinations.
  The bit-vector scan order, and the default T = 4.
* **Reset.** Reset is synchronous and active-high. It clears the table, the
  buffer pointers and the bit-vector.
* **Status outputs.** The event strobes (`ev_*`, `g_events`) and
  `num_intervals` are for observation and testing only.

Not included: the L2 cache, the off-chip transfer itself, and the offline
optimum used for comparison.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The testbenches use `$urandom` stimulus and
reference models written independently of the RTL:

| testbench | what it establishes |
|---|---|
| `tb_greedy_controller` | Both worked examples above, plus a merge with the line below the pair. It checks the minima the controller sees, the table after each step, the abort on a hit, and the exact cycle count, including the 2K+1 worst case. |
| `tb_greedy_tracker` | Default size. After every isolated update, the whole table matches `greedy_ref_pkg`, and the cycle count matches the reference (maximum 33). Back-to-back bursts leave no idle gaps. Dump streams are checked. |
| `tb_cache_dump_top` | Both trackers, N = 256, K = 4. Over 12 dump periods it checks the dumped streams in order. The DUT's decision counts must match the reference, and every mechanism must occur: hit, extend, insert, merge, shift, buffer-full stall, both dumps, and an empty dump. |
| `tb_greedy_granularity` | 1024 lines tracked in 4-line units with K = 8. The table is checked against the reference on unit numbers, and the dumps send whole units. |
| `tb_overhead_sweep` | 16384 lines, one synthetic stream fed to greedy trackers with K = 4, 8, 16, 32 and buffers of 4, 8, 16, and to bit-vectors with T = 2 … 64. Every dump is checked against its reference. It prints the overhead and the processor stall cycles of each configuration. |
| `tb_cache_dump_top_full` | Top-level defaults (16384 lines, K = 16, T = 4): 3000 updates, then one dump of each tracker, checked line by line. |
| unit benches | FIFO against a queue. Table against an array. De-MUX exhaustive. Interval check at the bounds. Gap units on random sorted lists with ties. Merge logic. Dumping logic stream, cycle count and back-pressure. Bit-vector with T = 4 and T = 1. |

`greedy_ref_pkg` is the testbench's reference: the same decision rules, written
as list operations on a queue of intervals.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cache_dump_pkg.sv tb/greedy_ref_pkg.sv tb/tb_cache_dump_top.sv \
    --top-module tb_cache_dump_top
./obj_dir/Vtb_cache_dump_top
```

For the other benches, swap the file and the top name. `greedy_ref_pkg.sv` is
only needed by the benches that import it. Verilator finds the RTL
modules through `-Irtl`. Each testbench has a watchdog, and all of them finish
in well under a second.

The overhead the benches print comes from synthetic streams: a hot region
that jumps now and then, with random offsets. It is not meant to reproduce
results on real programs. Real overheads depend on the application's locality.
