# Word-interleaved L1 cache

A set-associative cache is fast because it reads every way of a set at the same time and
picks the hit afterwards. Most of that read is thrown away. A load needs one word, and a miss
needs no word at all. The word-interleaved (WI) cache removes this waste without changing the
SRAMs, the tags or the hit rate. It only changes where the words of a line are stored.

In a conventional 4-way cache a whole line sits in one data way. In the WI cache the line is
spread over the ways: word 1 of every line of a set is in data way 0, word 2 in data way 1,
and so on. Which data way holds the wanted word then depends only on the address offset, which
is known before the tags are compared. A load or a word store therefore activates **one** data
way instead of four. Only whole-line transfers (refill, write-back of a dirty victim) touch all
four data ways, and those are rare. The tag side and the replacement policy stay as in a
conventional cache, so hits, misses and victims are exactly the same.

This repository holds synthesizable SystemVerilog for that cache. The default configuration is
a 16 KB, 4-way cache with 32-byte lines and 2-cycle hits (an L1 data cache). It also has two
optional mechanisms that can be switched on at run time:

- a one-word **fast-hit buffer**;
- periodic **drowsy mode** of data-way rows, to cut leakage.

## Where a word lives

Default geometry: 128 sets, 4 ways, 32-byte lines. That gives 8-byte words, one per data way
per line. With 32-bit addresses:

| bits    | field                    | used by                                      |
|---------|--------------------------|----------------------------------------------|
| [31:12] | tag (20 bits)            | tag compare                                  |
| [11:5]  | set index (7 bits)       | set decoder, tag array                       |
| [4:3]   | word in line = data way  | offset decoder (a 2-to-4 decoder)            |
| [2:0]   | byte in the 8-byte word  | byte select (bit 2 picks the 4-byte half)    |

The tag array gives each line of a set a **line slot** s in 0..3. That is the same number a
conventional cache would call "the way the line is in". The data of the line is stored like
this:

```
data way 0, row <set>:  [ slot0.w1 | slot1.w1 | slot2.w1 | slot3.w1 ]
data way 1, row <set>:  [ slot0.w2 | slot1.w2 | slot2.w2 | slot3.w2 ]
data way 2, row <set>:  [ slot0.w3 | slot1.w3 | slot2.w3 | slot3.w3 ]
data way 3, row <set>:  [ slot0.w4 | slot1.w4 | slot2.w4 | slot3.w4 ]
```

Each data-way row is 32 bytes wide, the same as in a conventional cache, so the SRAM array is
unchanged. For a load, the path is:

1. The offset decoder selects data way `addr[4:3]`.
2. The set decoder and the wordline driver raise only that way's wordline.
3. The row is read while all four tags are read and compared.
4. The way's own small mux (256 bits in, 64 out) picks the word in the hit slot.
5. The byte select takes the addressed 4 bytes.

A conventional cache uses one wide mux after four row reads. Here each data way has its own
small mux, and only one mux is active.

In general each line is split into `WAYS` words of `LINE_BYTES/WAYS` bytes each. The placement
needs at least one 4-byte processor word per data way, so `LINE_BYTES >= 4*WAYS`. An 8-way
cache therefore needs lines of at least 32 bytes. An elaboration-time check enforces this.

## What each access activates

`data_way_en` shows, cycle by cycle, which data ways are active. The `ev_*` outputs pulse once
per event, so an energy model can be driven from the counts.

| access                         | tag ways read | data ways active                                       |
|--------------------------------|---------------|--------------------------------------------------------|
| load hit                       | all           | 1 (read)                                               |
| store hit                      | all           | 1 (write of the hit slot's word, byte-masked)          |
| load miss, clean or invalid victim | all       | 1 (lookup read), then all 4 (refill write)             |
| load miss, dirty victim        | all           | 1, then all 4 (victim read), then all 4 (refill write) |
| store miss                     | all           | as a load miss, without the lookup read                |
| fast hit                       | none          | none                                                   |

A store reads no data while its tag is checked, because it needs none. Its word is written
only after the hit is known, into the hit slot. On a store miss it is merged into the refill.

The refill writes word *i* of the new line into data way *i*, in the victim's slot. Other
slots of the row are protected by byte write enables. The write-back read takes the victim's
word from each data way (each way's mux selects the victim slot) and puts the line back
together in order.

The saving is largest for read-heavy traffic. A line transfer costs more than in a
conventional cache, because it touches four rows instead of one. That trade-off is the
design's own.

## Controller and timing

The cache is blocking. It accepts one request at a time, and `cpu_req_ready` is high only
when the cache is idle. Latencies are counted from the cycle in which a request is accepted
(cycle 0) to the cycle in which `cpu_resp_valid` is high.

| case                                              | latency                                |
|---------------------------------------------------|----------------------------------------|
| load or store hit                                 | `HIT_LATENCY` (2; set 1 for an I-cache) |
| fast hit (buffer on, load, buffer matches)        | 1                                      |
| buffer on, no match                               | `HIT_LATENCY + 1`                      |
| needed row drowsy                                 | `HIT_LATENCY + 1`                      |
| buffer on, no match, and row drowsy               | `HIT_LATENCY + 1` (the two penalties overlap) |
| miss                                              | lower-level time plus about 4 cycles   |

The controller states (type `wi_state_e` in `wi_pkg`) are:

- `S_IDLE`: accepts a request and issues the tag read and, for a load, the one-way data read
  in the same cycle. It goes to `S_ISSUE` instead when the buffer is on or the row must be woken. A fast
  hit goes straight to `S_RESP`.
- `S_ISSUE`: issues the array reads one cycle late.
- `S_LOOKUP`: compares the tags.
  - A hit answers. With `HIT_LATENCY=1` it answers combinationally in this cycle; with 2 it
    answers from a register in `S_RESP`. A store hit writes its word and sets the dirty bit
    in this cycle.
  - A miss latches the victim slot from the LRU. The victim is the lowest invalid slot, else
    the least recently used one. The controller then goes to `S_WB_READ` if the victim is
    valid and dirty, and to `S_FILL_REQ` otherwise.
- `S_WB_READ` → `S_WB_SEND`: reads all four data-way rows, then holds the reassembled line on
  `mem_req_*` until `mem_req_ready`.
- `S_FILL_REQ` → `S_FILL_WAIT`: requests the line, then waits for the single
  `mem_resp_valid` beat. The beat is written into all four data ways, a store is merged into
  it (write-allocate), and the tag is written with dirty = store.
- `S_RESP`: registered answer, then back to `S_IDLE`.

Stores are acknowledged with `cpu_resp_rdata = 0`. Accesses are 4-byte aligned, and address
bits [1:0] are ignored.

Lower-level port:

- It carries whole lines: 256 bits in, 256 bits out.
- Only one request is outstanding at a time.
- `mem_req_valid`, `mem_req_write`, `mem_req_addr` and `mem_req_wdata` stay stable until
  `mem_req_ready` is high.
- A read is answered by one `mem_resp_valid` pulse carrying the line.
- A write gets no answer.

## Fast-hit buffer

With `cfg_fast_hit_en` high, the cache first checks a buffer holding the word (8 bytes) most
recently read from the arrays, with its address down to the word (29 bits).

- A load to that word is answered in one cycle from the buffer, with no tag or data access.
  Fast hits do not update the LRU state.
- Any other request pays one extra cycle before the arrays are read.
- A store invalidates the entry if it hits the same word, so the buffer never holds stale data.
- Turning the buffer off empties it.

The buffer holds one word rather than one line because in the WI cache only one word comes out
of the arrays.

## Drowsy mode

With `cfg_drowsy_en` high, `wi_drowsy_ctrl` keeps one mode bit per data-way row
(128 × 4 = 512 bits), brought out on `drowsy_rows`. The supply circuit that actually lowers a
row's voltage is analog and is not part of this RTL. The bits are meant to drive it.

- Every `DROWSY_WINDOW` cycles (default 2000) all rows are made drowsy at once.
- A load or word store wakes only the one row it needs: data way `addr[4:3]` of its set. This
  costs one cycle.
- A line transfer wakes all four rows of the set. Because this happens during the miss, it
  normally adds no time.

In the WI cache, a second word of the same line lives in a different data way, so it pays its
own wake-up. A conventional drowsy cache wakes the whole set and pays only once. In return,
far fewer rows are awake on average.

Two rules make this safe:

- While an access is in flight, the periodic sleep is postponed until the controller is idle
  again.
- In the accepting cycle the needed row is always given a wake request, and a wake request
  beats a sleep in the same cycle.

Together these guarantee that a row is never read or written while drowsy. In the real array
that would destroy its contents. An assertion in `wi_cache` (`a_no_drowsy_access`) checks it.

## Module map

| file                     | what it is                                                        |
|--------------------------|-------------------------------------------------------------------|
| `wi_pkg.sv`              | processor word size, controller state type                        |
| `wi_cache.sv`            | top: controller and wiring                                        |
| `wi_offset_decoder.sv`   | offset MSBs to one-hot data way (2-to-4 by default)               |
| `wi_set_decoder.sv`      | set index to one-hot set lines                                    |
| `wi_wordline_driver.sv`  | set lines AND way selects: per-way wordlines                      |
| `wi_data_array.sv`       | one data way: 128 rows × 32 bytes, byte-masked write, registered read |
| `wi_way_mux.sv`          | the small per-way mux (slot select), drives zero when idle        |
| `wi_tag_array.sv`        | tags, valid and dirty bits of all ways, parallel read             |
| `wi_tag_compare.sv`      | one comparator per way, hit way                                   |
| `wi_lru.sv`              | per-set true LRU (age per way), invalid slots first               |
| `wi_byte_select.sv`      | 4-byte word in and out of an 8-byte way word                      |
| `wi_fast_hit_buffer.sv`  | one-word buffer for fast hits                                     |
| `wi_drowsy_ctrl.sv`      | window counter and row modes                                      |

The data arrays are written as memories (`logic [255:0] mem [128]`), with no reset, so a
synthesis flow can map them to SRAM macros. `wi_data_array` takes a one-hot wordline vector,
like a real array, and turns it back into a row number internally. Valid bits, dirty bits,
LRU ages and drowsy bits are flip-flops with a synchronous active-low reset (`rst_n`).

## Parameters

| parameter       | default | meaning                                         |
|-----------------|---------|-------------------------------------------------|
| `CACHE_BYTES`   | 16384   | data capacity                                   |
| `WAYS`          | 4       | associativity = number of data ways (≥ 2)       |
| `LINE_BYTES`    | 32      | line size (≥ 4 × `WAYS`)                        |
| `ADDR_W`        | 32      | address width                                   |
| `HIT_LATENCY`   | 2       | 2 for a data cache, 1 for an instruction cache  |
| `DROWSY_WINDOW` | 2000    | cycles between global sleeps                    |

The geometry is fully parameterized. A 32 KB cache with 2, 4 or 8 ways and lines from 8 to
64 bytes is obtained by parameters alone. The combinations excluded by `LINE_BYTES >= 4*WAYS`
stop elaboration with an error. Cache and line sizes should be powers of two.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/wi_pkg.sv tb/tb_wi_cache.sv \
          --top-module tb_wi_cache -Mdir obj_tb_wi_cache -o sim
./obj_tb_wi_cache/sim
```

Replace `tb_wi_cache` with any other `tb_*` name to run that test. `-y tb` lets the two study
testbenches below find their helper modules. The block tests finish in about a second. The two
studies take about 10 and 20 seconds.

`tb_wi_cache` runs the full default configuration end to end against its own models:

- a reference memory image;
- a cache-state model (slots, dirty bits, LRU order) that predicts every hit, miss and dirty
  victim;
- a model of the one-word buffer;
- a lower-level memory with a 12-cycle read latency that randomly delays accepting requests.

It checks:

- every load's data and every written-back line;
- the exact latency of every hit and fast hit;
- that a hit never activates more than one data way;
- that the cycles with all four data ways active match the number of line transfers exactly.

It runs four phases: plain, buffer on, drowsy on (with directed wake-up cases), and both on.
It fails if any mechanism never happened:

- load hit, store hit, load miss and store miss;
- dirty victim;
- fast hit and buffer-miss penalty;
- wake-up latency, wake and sleep;
- one-way activation.

`tb_wi_cache_configs` runs the same kind of random traffic on five other configurations, each
through its own copy of `tb_wi_cache_run`:

- 16 KB 4-way with 1-cycle hits (instruction-cache timing);
- 32 KB 8-way with 64-byte lines;
- 32 KB 8-way with 32-byte lines, giving 4-byte words;
- 32 KB 2-way with 8-byte lines, also 4-byte words;
- 8 KB 2-way with 32-byte lines, giving 16-byte words.

`tb_wi_cache_drowsy_windows` compares drowsy update windows on the default cache. Six copies
run the same fixed request stream from `tb_wi_cache_drowsy_run`. The stream uses a fixed-seed
generator and always-ready memory, so the run is repeatable. One copy has drowsy mode off and
the others use windows of 500, 2000, 4000, 8000 and 32000 cycles. Besides checking all data,
it checks three trends:

- a longer window leaves fewer rows drowsy;
- a longer window causes no more wakes and costs no more cycles;
- no copy is slower than the reference by more than one cycle per wake.

With its deliberately dense stream it prints:

| window | rows drowsy | slowdown |
|-------:|------------:|---------:|
| 500    | 94.2 %      | 10.7 %   |
| 2000   | 79.5 %      | 9.1 %    |
| 4000   | 64.4 %      | 7.3 %    |
| 8000   | 44.1 %      | 5.0 %    |
| 32000  | 12.7 %      | 1.4 %    |

The stream issues a request every few cycles, so these slowdowns are far above what a
processor that does other work between cache accesses would see.

## How far this follows the original design, and what it adds

From the original WI cache design:

- the data placement, offset decoding and AND-ed per-way wordlines;
- one small mux per data way;
- one-way loads and word stores, and all-way line transfers;
- a data read during the tag check for loads only;
- write-back with write-allocate, and LRU replacement;
- the 16 KB / 4-way / 32-byte geometry, and the 2-cycle (data) and 1-cycle (instruction) hit
  latencies;
- the fast-hit buffer holding one word with its address, and the one-cycle buffer-miss penalty;
- the periodic drowsy policy: 2000-cycle window, one-cycle wake-up, and only the accessed row
  woken.

Choices made here, where the original says nothing:

- 32-bit addresses and 4-byte aligned processor accesses with byte enables;
- the blocking controller and its state sequence;
- the valid/ready handshakes and the line-wide lower-level port;
- invalid slots filled before LRU;
- stores invalidating the buffer, and fast hits not touching LRU;
- tags never drowsy;
- sleep postponed during an access, wake beating sleep, and the two one-cycle penalties
  overlapping;
- the synchronous active-low reset.

One departure: the original counts a separate word write after the refill of a store miss.
Here the store is merged into the refill line, which saves that array write and a cycle.
Contents and hit/miss behaviour are the same.

Not in the RTL:

- the analog parts: precharge, sense amplifiers, output drivers and the drowsy supply switch;
- the subarray (subbank) floorplan of the arrays, which is a layout matter;
- the lower-level memory and the processor, which the testbench models.

The fast-hit and drowsy mechanisms are options for studying the WI cache alongside those
techniques. Both are off unless `cfg_fast_hit_en` / `cfg_drowsy_en` are driven high.

The design's value is energy. The RTL shows where the energy is spent (`data_way_en`,
`ev_*`), but it cannot measure energy. Per-access energies have to come from a circuit-level
model of the arrays.
