# RC-NVM: a main memory that reads rows and columns alike

In-memory databases mix two access patterns on the same table. Transactions
read whole tuples (one row of the table), analytics scan one field of every
tuple (one column). A conventional memory stores the table row by row, so a
column scan becomes a strided access: every 64-byte line fetched carries 8
useful bytes and every access opens a new row buffer.

A crossbar non-volatile memory (RRAM, PCM, 3D XPoint) has no access
transistor in its cells: word lines and bit lines are electrically
interchangeable. Swapping the roles of the two lines senses a whole *column*
of the array instead of a row, with no change to the cell array and only
extra peripheral circuits. This RTL models a memory system built on that
property:

* every 8-byte word has two addresses, a row-oriented one and a
  column-oriented one;
* each bank has a row buffer and a column buffer, never open at the same time;
* the memory controller forwards the orientation with each request and
  schedules FR-FCFS (first-ready, first-come first-served);
* the cache can hold the same word twice, in a row line and in a column
  line, and keeps both copies identical.

## Two addresses for one word

The 32-bit address has these fields, from the most significant bit down:

| bits    | 31:30 | 29:27    | 26:24 | 23      | 22:13  | 12:3   | 2:0      |
|---------|-------|----------|-------|---------|--------|--------|----------|
| row     | rank  | subarray | bank  | channel | row    | column | byte     |
| column  | rank  | subarray | bank  | channel | column | row    | byte     |

The two forms differ only in the order of the two 10-bit fields. Adding 8 to a
row-oriented address steps along a physical row; adding 8 to a
column-oriented address steps down a physical column. Converting one form into
the other swaps the two fields (`swap_orient` in `rcnvm_pkg`). Example: the
word at row 437, column 182 of subarray 0 has the row address `0x0036a5b0`
and the column address `0x0016cda8`.

Load and store use row addresses. The column loads and stores (`cload` and
`cstore` in the processor) use column addresses. In this RTL the processor
port has an `orient` input that says which form an address is in.

A 64-byte line is 8 consecutive words of its orientation. A row line is
8 columns of one row. A column line is 8 rows of one column.

## Crossing lines and the synonym problem

A row line (row r, columns c..c+7) shares exactly one word with each of
8 column lines (columns c..c+7, rows r&~7..r|7), and the reverse also holds.
All 64 words involved lie in one aligned 8 x 8-word tile of the subarray.
For word k of a line at line address `a`, the crossing line of the other
orientation is at

    cross_line(a, k) = swap_orient(a with bits 5:3 set to k), bits 5:0 cleared

and the shared word sits in that line at position `a[15:13]`, the low three
bits of `a`'s row (or column) field.

`rcnvm_cache` stores these bits with each line:

* an **orientation bit** (0 = row line, 1 = column line), which is part of
  the tag match;
* 8 **crossing bits**, one per word. A crossing bit is 1 when the crossing
  line that shares the word is also in the cache.

It keeps every pair of copies equal with three rules:

1. **Fill.** When a line arrives from memory, the cache looks up its 8
   possible crossing lines, one per cycle. For each one present, it copies
   the shared word from that line into the new line, because the cached copy
   may be newer than memory. It then sets the crossing bit in both lines.
2. **Store.** A store to a word whose crossing bit is 1 writes the crossing
   line's copy too, and marks that line dirty. This costs one extra lookup.
3. **Evict.** Before a line leaves, the cache clears the crossing bits that
   point at it, one lookup per word. A dirty line is then written back.

Loads pay nothing extra. A dirty word can be dirty in both copies. Each copy
then writes back the same value, so write-back order does not matter.

Cost in cycles: a hit answers 2 cycles after the request is accepted. A store
to a crossed word takes 3 cycles. A miss adds 8 lookup cycles for the fill,
the memory time, and 8 more cycles when the victim is valid.

**Pinning (group caching).** `OP_PIN` loads a line and marks it pinned.
Software can use this to fetch a rectangle of column lines and then read it
in row order, for example a field wider than 8 bytes. Replacement passes
over pinned ways while an unpinned way is left. `OP_UNPIN` releases the line.

## Banks: one buffer at a time

`rcnvm_bank` is one bank seen at rank level. The 8 chips of a rank work in
lockstep, so one 64-bit word is the 8-byte access unit. A bank holds `N_SUB`
subarrays of `ROWS x COLS` words. A request opens the row buffer (row line) or
the column buffer (column line) of one subarray. If the other buffer, or
another row or column, is open, the bank first closes it:

| situation                     | cycles until the response          |
|-------------------------------|------------------------------------|
| open buffer hit               | tCAS = 6                           |
| bank closed                   | tRCD + tCAS = 18                   |
| other buffer/line open, clean | tRP + tRCD + tCAS = 19             |
| other buffer/line open, written | tRP + tWP + tRCD + tCAS = 25     |

tCAS, tRCD and tRP are in cycles of the LPDDR3-800 memory clock. tWP = 6
cycles stands for the 15 ns write pulse that a written buffer needs when it
is restored. Buffers stay open after an access (open-page policy).

Only one buffer can be open, so the open buffer's contents are always the
array contents plus the writes made to it. The model therefore keeps only the
buffer's state: orientation, subarray, index and a written flag. Data is read
and written in the array at column-access time. The array is stored as
8 x 8-word tiles (4096 bits per entry), so each row line and each column line
is a single tile access, through one read port and one write port.

**ECC.** With the bank parameter `ECC` set (the default), a ninth chip in the
rank stores an 8-bit check field with every word. Each word is then kept as a
72-bit SECDED Hamming code word (`rcnvm_secded`). It is encoded when written
and corrected when read. Single-bit errors are corrected without notice, and
the error flags are not brought out of the bank.

## Memory controller

`rcnvm_mem_ctrl` serves one channel. It decodes each line request with the
field order of its orientation and keeps it in a collapsing queue of 32
entries, where entry 0 is always the oldest. Each cycle it issues at most one
request on a command bus shared by all `N_RANK x N_BANK` banks of the channel.
It only issues to an idle bank, and it picks:

1. the oldest request that hits its bank's open buffer (same orientation,
   subarray and row or column);
2. otherwise, the oldest request.

Reordering is allowed only where it is safe. A request never overtakes an
older request to the same 8 x 8 tile of the same bank and subarray if either
of the two is a write. A row line and a column line in one tile share a word,
so reordering them could return stale data. Responses carry the request's id.
When several banks finish together, the lowest bank index goes first.

## Top level

`rcnvm_system` puts together the processor port, `rcnvm_cache`, steering by
the channel bit (bit 23, the same in both address forms), one
`rcnvm_mem_ctrl` per channel, and its banks. The defaults are the evaluated
configuration:

| parameter     | default | meaning                                    |
|---------------|---------|--------------------------------------------|
| `N_CH`        | 2       | channels                                   |
| `N_RANK`      | 4       | ranks per channel                          |
| `N_BANK`      | 8       | banks per rank                             |
| `N_SUB`       | 8       | subarrays per bank                         |
| `ROWS`,`COLS` | 1024    | words per subarray row / column (8 KB)     |
| `QDEPTH`      | 32      | request queue entries per controller       |
| `CACHE_BYTES` | 32768   | cache size                                 |
| `CACHE_WAYS`  | 8       | associativity                              |

That is 4 GB of memory (2 x 4 x 8 x 8 x 8 MB). The event outputs (`ev_*`)
pulse once per occurrence, so a testbench can count hits, buffer switches,
synonym copies and similar events.

## Where this RTL departs from the published design, or goes beyond it

* **Single core, single cache level.** The evaluated system has 4 cores,
  private L1 and L2 caches, a shared L3 and directory-based MESI coherence.
  Here one cache (with the L1 geometry) sits directly on memory. The synonym
  rules are the part that is specific to RC-NVM. Coherence is an unchanged
  standard protocol and is not included.
* **One clock.** Cache and memory share a clock. Latencies in the cache are in
  that clock's cycles.
* **Blocking cache.** One request at a time and one line request
  outstanding. At the top level, each controller queue therefore never holds
  more than one request, so FR-FCFS reordering and a full queue only show up
  when the controller is used on its own (as in its testbench).
* **Crossing bits on clean evictions.** They are cleared on every eviction,
  not only on the write-back of a dirty line. Clearing only on write-back
  would leave bits pointing at lines that are gone.
* **ECC on by default.** The SECDED chip is offered as an easy addition
  rather than as part of the evaluated configuration. Set `ECC=0` on the
  banks for a plain 64-bit bus.
* **Write-pulse charge, tile layout, open-page policy, handshakes, the
  scheduler's tile hazard rule and the replacement policy** are choices of
  this design.
* **Not modelled:** the analog periphery of the crossbar mats (drivers, sense
  amplifiers, multiplexers, hierarchical decoders), DDR data-bus contention
  between banks, and the software side
  (placing tables as row or column chunks, and the query planner that issues
  group-caching requests).

## Files

| file | contents |
|------|----------|
| `rtl/rcnvm_pkg.sv` | address fields, `swap_orient`, `decode_addr`, `cross_line`, operation and orientation types |
| `rtl/rcnvm_addr_map.sv` | combinational address decoder and orientation converter |
| `rtl/rcnvm_bank.sv` | bank with exclusive row/column buffers and timing |
| `rtl/rcnvm_secded.sv` | (72,64) SECDED encoder and decoder used by the bank |
| `rtl/rcnvm_mem_ctrl.sv` | 32-entry FR-FCFS channel controller |
| `rtl/rcnvm_cache.sv` | synonym-aware cache with crossing bits and pinning |
| `rtl/rcnvm_system.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_rcnvm_system_full.sv` | top level at full size (4 GB) |

## Simulating

Every testbench checks its block against a reference model and ends with a
line `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/rcnvm_pkg.sv tb/tb_rcnvm_system.sv --top-module tb_rcnvm_system
    ./obj_dir/Vtb_rcnvm_system

Use the same command for the other `tb/tb_*.sv` files. The block testbenches
use small memories (2 subarrays of 16 x 16 words) and finish in under a
second:

* `tb_rcnvm_secded` checks every single-bit error and random double errors.
* `tb_rcnvm_addr_map` checks the worked example and random addresses.
* `tb_rcnvm_bank` checks data and the exact latency of every access.
* `tb_rcnvm_mem_ctrl` checks FR-FCFS order and data under random traffic.
* `tb_rcnvm_cache` checks the worked example (four column lines crossing one
  row line, then a store seen through the column address), hit latency,
  pinning and random mixed-orientation traffic.
* `tb_rcnvm_system` runs the whole system at reduced size. It counts each
  mechanism and fails if any of them never happened.

`tb_rcnvm_system_full` uses the default parameters. Its 4 GB array (4.5 GB
with the check bits) needs about 5 GB of host memory, and the simulation takes a few seconds. The
simulator leaves memory contents random. The testbenches write every word
they later read, or compare against the written value.
