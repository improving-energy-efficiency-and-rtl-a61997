# Delta value indicator (DVI) for a phase-change-memory last-level cache

Phase change memory (PCM) makes an attractive last-level cache because its
cells do not leak, but every write is expensive: it costs far more energy than a
read, and each cell survives only a limited number of writes. Many write-backs
into a last-level cache change a word only slightly: a counter moves by one, a
pointer by a few bytes. The delta value indicator scheme exploits this. Next to
the PCM data array sits a small **delta value array (DVA)** holding an m-bit
signed *delta* for every 32-bit word. When a new value is within a small
distance of the stored one, only that difference is written into the DVA and the
expensive data-array cells are left alone. On a read the delta is added back.

This repository holds synthesizable SystemVerilog for such a cache: a 4 MB,
16-way PCM L2 with 64-byte lines and 4-bit deltas, following the scheme
described in *Improving Energy Efficiency and Lifetime of Phase Change Memory
using Delta Value Indicator* (Choi and Kwak). It also contains the write-reduction
techniques that DVI builds on: per-word dirty bits, narrow-width values and
read-before-write.

## The per-word rule

Each 32-bit word of a line has three pieces of state:

| state    | where            | meaning                                             |
|----------|------------------|-----------------------------------------------------|
| `base`   | data array (PCM) | the stored value                                    |
| `narrow` | narrow flags     | the upper half of `base` is not valid and reads as 0 |
| `delta`  | DVA (PCM, M bits)| signed correction                                   |

```
effective = narrow ? {16'h0, base[15:0]} : base
current   = effective + sign_extend(delta)          (read adder, modulo 2^32)
```

When the upper level writes a new value `v` into the word:

```
d = v - effective                                    (subtractor, exact 33-bit)
if  -2^(M-1) <= d <= 2^(M-1)-1 :   delta <- d[M-1:0]    data array untouched
else                            :   delta <- 0
                                    if v[31:16] == 0 : narrow <- 1, write base[15:0] only
                                    else             : narrow <- 0, write all of base
```

Two things are worth noticing.

* **The delta is measured against the data array, not against the current
  value.** A word that takes many small steps around one base value never
  touches the data array. The delta is simply replaced each time. Only a move
  of more than 2^(M-1) away from the base rewrites the base.
* **The "small" test must include the delta's own sign bit.** With M = 4 the
  delta covers -8..7. The test checks that the borrow and bits `d[31:3]` are all
  zeros or all ones. That is 30 bits, one more than the 32-M upper bits. If
  only `d[31:4]` were checked, a difference of +12 would pass. Stored as `1100`,
  it would then read back as -4. `small_value_detect` makes exactly this check.
  Its unit test covers the boundary values, and its fault copy (the check without
  the sign bit) fails.

The subtractor's borrow takes part in the test. So a difference that only
becomes small through wrap-around modulo 2^32 counts as large. For example,
going from 0xFFFFFFFF to 0 is a large difference.

## Where writes are avoided

A write-back from the upper level goes through four filters before a PCM cell
switches:

1. **Per-word dirty mask (MDB).** Only words that the upper level marked
   dirty (`req_wmask`) are considered. Clean words are not written at all.
2. **Delta absorption (DVI).** A dirty word that lands near its base only
   writes its M-bit DVA entry.
3. **Narrow-width values (NWV).** A word whose upper half is zero writes only
   its lower half, and sets its narrow flag.
4. **Read-before-write (RBW).** Every array write compares the old row with the
   intended row. Only differing bits are written (`pcm_line_array` takes a bit
   mask). An array that has no differing bits gets no write at all.
   `rbw_compare` also counts the SET (0 to 1) and RESET (1 to 0) bit operations,
   because the two cost different energy in PCM.

For every array write, the cache reports what really happened on `stat_valid` /
`stat` (`dvi_pkg::dvi_wr_stat_t`):

* the dirty, absorbed and narrow words;
* the data and DVA words that changed at least one bit;
* the SET and RESET bits in each array.

These are the quantities that dynamic-energy and lifetime estimates are built
from. A consumer can weight them by per-operation energies (for a 4 MB PCM
array in 32 nm, read 0.793 nJ, SET 11.663 nJ, RESET 6.257 nJ per access, and
for a 4-bit DVA 0.056 / 1.515 / 0.840 nJ).

## Cache organisation

| parameter   | default | meaning                                  |
|-------------|---------|------------------------------------------|
| `N`         | 32      | word width covered by one delta          |
| `M`         | 4       | delta width (the scheme is evaluated for 1..4) |
| `LINE_BITS` | 512     | line size (64 bytes)                     |
| `WAYS`      | 16      | associativity                            |
| `SETS`      | 4096    | sets (4 MB in all)                       |
| `ADDR_W`    | 32      | byte address width                       |
| `READ_LAT`  | 27      | read hit latency, cycles                 |
| `WRITE_LAT` | 64      | write-back hit latency, cycles           |

There are four arrays, all instances of `pcm_line_array`. Each has a synchronous
read, a bit-masked write and a row decoder.

* Tag array: `SETS` rows. Each row holds {valid, dirty, tag} for every way,
  plus the round-robin replacement pointer of the set.
* Data array: `SETS*WAYS` rows of 512 bits.
* Narrow flags: `SETS*WAYS` rows of 16 bits.
* DVA: `SETS*WAYS` rows of `16*M` bits. It has the same sets and ways as the
  data array.

At the defaults the DVA adds 64 bits to every 512-bit line, 12.5 % more storage
bits. The published area estimate for 1T1R PCM cells is lower: about 2 to 7 %
of the cache area for M = 1..4.

Sixteen `dvi_word_path` instances work on the line read from the arrays, one
per word. Each contains the subtractor, the small-value detector, the delta/zero
multiplexer and the read adder.

## Controller and timing

`dvi_llc` is a single state machine. Only one request is in flight at a time.

```
INIT --(SETS cycles: clear tag rows)--> IDLE
IDLE --accept--> TAG_RD --> TAG_CMP --> LINE_OP --hit--> WAIT --(latency reached)--> IDLE
                                            |
                                          miss
                                            v
                        [EVICT if victim dirty] --> FETCH --> FILL_WAIT --> FILL --> TAG_RD
```

* **TAG_CMP** compares the tags of the set. It picks the hit way. On a miss it
  picks the first invalid way, or else the set's round-robin way. It then starts
  the read of that line from the data, narrow and DVA arrays.
* **LINE_OP**, on a hit, returns the reconstructed line (read) or performs the
  write-back: word paths, RBW masks, array writes, and the dirty bit set. On a
  miss it captures the reconstructed victim line for eviction.
* **FILL** writes the fetched line. It applies the narrow rule, clears all
  deltas and uses RBW against the old contents. Then the lookup repeats, and
  now hits.
* Latency: a hit completes with a one-cycle `resp_valid` exactly `READ_LAT` or
  `WRITE_LAT` clock edges after the edge that accepted the request. A miss
  takes the memory round trip plus the same latency again.
  A write-back absorbed by the DVA also takes `WRITE_LAT`.

Interfaces:

* **Upper level:** `req_valid`/`req_ready`, `req_op` (`OP_READ` or
  `OP_WRITEBACK`), `req_addr`, `req_wdata` and `req_wmask` (one dirty bit per
  word), then `resp_valid`, `resp_hit` and `resp_rdata`.
* **Memory:** `mem_req_valid`/`mem_req_ready` with `mem_req_write`, a line
  address and a full line of write data. `mem_resp_valid` and
  `mem_resp_rdata` return a line.

The reset `rst_n` is asynchronous and active low. The storage arrays are not
reset. The INIT sweep clears the tag rows, so nothing stale is ever read as
valid.

## Choices made in this design

These points are not fixed by the scheme. They were chosen here:

* **Interfaces and handshakes.** Both ports are whole-line. A real system
  would move a line over a 64-bit memory bus in beats.
* **Address width.** Addresses are 32 bits wide.
* **Replacement.** The first invalid way is used, or else a per-set
  round-robin pointer.
* **Reset.** The tag array is cleared by a sweep, one set per cycle.
* **Misses.** A miss is handled serially: evict, fetch, fill, then look up
  again.
* **Write-back misses** allocate the line. With an inclusive hierarchy they
  should not occur. Back-invalidation of the L1 when an LLC line is evicted is
  not implemented.
* **Narrow flags** are kept per 32-bit word, in an array of their own. The
  delta is applied on top of the narrow (zero-extended) value.
* **Fills** clear the deltas and follow the narrow rule.
* **Statistics output.** The `stat` record is an addition for measurement.

Where the scheme's own statements differ, this design takes the following
readings:

* **Which bits the small-value test checks.** The test follows the stated
  delta range -2^(m-1)..2^(m-1)-1. It does not follow the shorter "upper n-m
  bits" wording, which would admit wrong deltas (see above).
* **The cache size.** The cache is 4 MB, the size of the simulated system's L2.
  The 16 MB figure from the energy-model setup is not used.
* **The names SET and RESET.** SET means a 0-to-1 switch.

## Not modelled

* The PCM cell itself: a GST resistor with an access transistor. Each cell is
  a register bit.
* Per-operation energy, and cell wear-out or lifetime tracking. The `stat`
  outputs give the write and bit counts that such models consume.
* The processor, the L1 caches and the DDR memory. Only their interfaces
  appear, and the testbenches model memory behaviourally.
* The benchmark workloads used to evaluate the scheme (SPEC CPU2006 traces).
  Their traces are not available, so the testbenches drive synthetic traffic
  instead. This traffic mixes small deltas, large changes, narrow values and
  unchanged words.

## Files

| file | content |
|------|---------|
| `rtl/dvi_pkg.sv` | request type, write-statistics record |
| `rtl/dvi_llc.sv` | top: cache controller, arrays, 16 word paths |
| `rtl/dvi_word_path.sv` | one word: subtract, detect, mux, narrow rule, read adder |
| `rtl/dvi_subtractor.sv` | new minus stored, with borrow |
| `rtl/small_value_detect.sv` | all-zeros / all-ones test of the upper bits |
| `rtl/dvi_adder.sv` | sign-extend delta, add to stored value |
| `rtl/rbw_compare.sv` | toggle mask, SET / RESET counts |
| `rtl/pcm_line_array.sv` | row-decoded array, synchronous read, masked write |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_dvi_llc.sv` | end-to-end, 4 sets x 2 ways, random traffic with golden model |
| `tb/tb_dvi_llc_full.sv` | full default size, one complete operation sequence |
| `tb/tb_dvi_llc_mscan.sv` | M = 1..4 side by side on the same write-back traffic |
| `tb/tb_mem_model.sv` | behavioural line-wide main memory used by the M sweep |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each one also has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_dvi_llc \
    rtl/dvi_pkg.sv tb/tb_dvi_llc.sv -o sim && obj_dir/sim
```

Verilator finds the other modules through `-Irtl` (one module per file,
named after the file).

* `tb_dvi_llc` runs about 3000 random reads and write-backs. Each mechanism
  must occur at least once: hit, miss, fill, dirty eviction, DVA-absorbed word,
  data-array word write, narrow store, clean words skipped, and a write removed
  by RBW. The test checks every hit's latency, and checks every read and every
  eviction against a golden memory image.
* `tb_dvi_llc_full` builds the cache at its defaults, with the full 4 MB arrays.
  It finishes in a few seconds.

* `tb_dvi_llc_mscan` runs four caches with M = 1, 2, 3 and 4 on identical
  traffic: 16 sets x 4 ways, 128 lines. In this traffic, 40 % of dirty words
  move by at most 16. For each M it prints the data-array words written,
  normalised to a cache with only per-word dirty bits and read-before-write.
  One run gave 0.985, 0.960, 0.912 and 0.800 for M = 1..4. The shape matches
  the scheme's claim that larger deltas absorb more writes. The numbers are not
  benchmark results.

To try another delta width, override `M` on `dvi_llc`. The unit tests of the
detector also run at `M = 2`.
