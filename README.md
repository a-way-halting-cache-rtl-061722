# Way-halting cache

A conventional four-way set-associative cache reads four tags and four data
words on every access, although at most one of them is wanted. The tags held
in one set usually already differ in their lowest few bits, so most of that
work could be skipped if those bits were known before the arrays are read.

The way-halting cache makes that possible. The lowest four tag bits of every
line of every way go into a separate small memory, the **halt tag array**,
one per way. This memory is fully associative: all of its rows are compared
with the low tag bits of the address at once. That means the comparison does
not need the decoded set index, so it runs while the index is still being
decoded. Each row's match result then gates that row's word line. A way whose
selected line has different low tag bits is **halted**: its main tag array
and its data array are not read. On a hit, usually only the way that holds the
line is opened. On a miss, usually no way is opened. The hit rate is exactly
that of a plain four-way cache, and no cycle is added.

This repository has synthesizable SystemVerilog for the whole cache: the
lookup path described above, plus a small controller for refills and stores.
It also has self-checking testbenches for every module.

## Organisation

| quantity | default | parameter |
|---|---|---|
| capacity | 8 KB | `CACHE_BYTES` |
| associativity | 4 ways | `WAYS` |
| line | 32 bytes (8 words of 32 bits) | `LINE_BYTES`, `WORD_W` |
| sets | 64 | derived |
| address | 32 bits: tag [31:11], index [10:5], offset [4:0] | `ADDR_W` |
| halt tag | tag bits [3:0], i.e. address [14:11] | `HALT_BITS` |
| main tag | tag bits [20:4], 17 bits | derived |

Per way there is a 64 x 4 halt tag array with a valid bit per row, a 64 x 17
main tag array and a 64 x 256 data array. Each access reads one 32-bit word,
selected by address bits [4:2]. This models a data array whose word lines are
segmented, so that a read drives only one word.

## How a lookup is halted

A lookup takes two clock edges. The same timing holds whether zero, one or
four ways are opened:

```
cycle 0   index ──> index_decoder ──> dec[63:0] ─────────────┐
          tag[3:0] ──> halt_tag_array (64 comparators) ──> match[63:0]
                                                             │
                       word_line_driver: wl[r] = dec[r] AND match[r]
                       (a NAND gate followed by an inverter, per row)
                                                             │
          rising edge: only a way with a raised word line latches its
                       main tag and the selected data word  ─┘
cycle 1   opened[w] = a word line of way w rose
          hit[w]    = opened[w] AND (main tag read == tag[20:4])
          way_mux passes the hit way's word to the processor
```

Three things make this correct:

* **A halted way cannot hit.** If its low tag bits differ, or its line is
  invalid, the full tag cannot match. Halting therefore never changes which
  way hits, only how many arrays are read. The comparator gets `opened` so
  that a halted way, whose read register still holds an older value, can
  never report a hit.
* **Valid bits live in the halt tag array.** They gate the match lines, so
  empty lines are halted too.
* **The halt search and the decoding run side by side.** Both are
  combinational in cycle 0 and meet at the word line driver. In the circuit
  this design follows, the first inverter of each word line driver becomes a
  NAND gate that is sized to be as fast, so the critical path does not grow.
  In RTL this is the AND in `word_line_driver`.

`halt_tag_comparator` is the comparator of one halt tag row: one XOR gate per
bit, then a NOR gate. The rows are plain flip-flops. A custom layout would
use standard SRAM cells and transmission-gate XORs, but logically it is the
same.

## Module hierarchy

```
way_halting_cache            top: wiring, activity outputs
├── index_decoder            6 -> 64 one-hot in two gate levels (two 3 -> 8 predecoders, AND per row)
├── cache_way  (x WAYS)      one column of the cache
│   ├── halt_tag_array       64 rows of {valid, 4-bit halt tag}, written on refill
│   │   └── halt_tag_comparator (x 64)
│   ├── word_line_driver     NAND + INV per row
│   ├── tag_sram             main tag array, read through the word lines
│   ├── data_sram            data array, one word read, byte-enable writes
│   └── tag_comparator       hit = opened && main tags equal
├── way_mux                  AND-OR of the hit way's word
└── cache_controller         handshake, refill, stores, replacement
    └── replacement_lfsr     16-bit LFSR
whc_pkg                      default sizes, controller state type
```

## Controller: refills, stores and replacement

The halting technique itself says nothing about misses or writes. The
following behaviour is this implementation's own choice. It keeps the cache
blocking and simple.

* **Load hit:** the word is returned in cycle 1. A new request can be
  accepted in that same cycle, so hits flow at one per cycle.
* **Load miss:** `cpu_req_ready` drops in cycle 1, and the controller
  chooses a victim way. It takes the first invalid way of the set, or else a
  pseudo-random way, given by the low bits of a free-running LFSR. Random
  replacement matches the configuration the design was evaluated in. Next,
  the controller requests the line from memory, line-aligned. The memory
  returns words 0 to 7 in order. Each word is written into the victim's data
  array as it arrives. With the last word, the controller writes the main
  tag, the halt tag and the valid bit, and returns the requested word in that
  same cycle.
* **Store:** the lookup works as for a load. On a hit, the word in the hit
  way is updated under the byte enables. Hit or miss, the store is then
  written through to memory and acknowledged with `cpu_resp_valid`. A store
  miss does not allocate a line.
* **Reset:** `rst_n` is active-low and synchronous. It clears all valid bits
  and the controller state. The tag and data SRAMs are not reset: they are
  read only through valid, matching rows.

The controller has assertions for these rules:

* at most one way hits;
* a request that is not yet accepted stays unchanged;
* a memory request is held until it is accepted;
* memory words arrive only during a refill.

## Interfaces

All signals are sampled on the rising edge of `clk`.

| group | signals | protocol |
|---|---|---|
| processor request | `cpu_req_valid`, `cpu_req_ready`, `cpu_req_we`, `cpu_req_addr`, `cpu_req_wdata`, `cpu_req_be` | valid/ready; hold the request until it is accepted |
| processor response | `cpu_resp_valid`, `cpu_resp_rdata` | one pulse per request, in order: load data or store acknowledge |
| memory request | `mem_req_valid`, `mem_req_ready`, `mem_req_we`, `mem_req_addr`, `mem_req_wdata`, `mem_req_be` | valid/ready; `we=0` is a line read at a line-aligned address, `we=1` is a one-word write-through |
| memory response | `mem_resp_valid`, `mem_resp_rdata` | `LINE_BYTES/4` words of a line read, in order, with any gaps |
| activity | `lookup_done`, `lookup_hit`, `ways_opened[WAYS-1:0]` | in the cycle a lookup resolves: whether it hit, and which ways' arrays were actually read |

Latency: a load hit takes 1 cycle from acceptance to response. A load miss
takes 2 cycles plus the memory's grant delay plus the arrival time of 8 words.

## Measuring the saving

The energy of an access is roughly the fixed cost of the decoder and the
output mux, plus a per-way cost of the tag array, the data array, precharge,
sense amplifiers and comparator. A conventional cache pays the per-way cost
four times. This cache pays it once for every way that is actually opened,
plus the cost of searching four small halt tag arrays. `ways_opened` gives
that count directly. Sum `$countones(ways_opened)` over the lookups, and
compare the total with 4 per lookup for a conventional cache, or with the
ideal of 1 per hit and 0 per miss.

Results from the workload testbench are below. These numbers come from
synthetic streams. They are not measurements of real programs.

| configuration | hit rate | ways opened per lookup | ideal | tag changes |
|---|---|---|---|---|
| 8 KB, 2 halt bits, locality stream | 0.691 | 1.445 | 0.691 | 11.6% |
| 8 KB, 3 halt bits, same stream | 0.691 | 0.940 | 0.691 | 11.6% |
| 8 KB, 4 halt bits, same stream | 0.691 | 0.798 | 0.691 | 11.6% |
| 16 KB, 4 halt bits | 0.828 | 1.012 | 0.828 | 11.1% |
| 32 KB, 4 halt bits | 0.924 | 1.201 | 0.924 | 11.1% |
| 8 KB, 4 halt bits, loop `x[i]=y[i]+z[i]; a[i]=b*c[i]` | 0.623 | 0.623 | 0.623 | 94.1% |

"Tag changes" is the share of requests whose tag differs from that of the
previous request. It matters for power: the halt tag comparators are static
logic, so they draw dynamic power only when their inputs toggle. An
instruction stream through a loop would almost never change its tag. The
loop's data stream above changes its tag on nearly every access, because it
interleaves five arrays.

The locality stream draws its tags from a small pool, and some of those
tags share their low bits on purpose. That makes it harsher than typical
programs. The loop stream opens exactly the ideal number of ways. The loop's
hit rate is low because stores do not allocate lines.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_halt_tag_comparator` | all 256 stored/desired pairs |
| `tb_halt_tag_array` | every search value after random writes and invalidations, against a reference copy |
| `tb_index_decoder`, `tb_word_line_driver`, `tb_tag_comparator`, `tb_way_mux` | exhaustive or random combinational checks |
| `tb_tag_sram`, `tb_data_sram` | one-cycle read through a word line, hold while halted, byte-enable writes |
| `tb_cache_way` | invalid, halted, opened-but-missed and hit cases, back to back |
| `tb_cache_controller` | the controller against behavioural ways and memory: data, latency, victim choice, write-through, no store allocation |
| `tb_way_halting_cache` | end to end at the default size (see below) |
| `tb_cache_workloads` | the configurations in the table above (uses `cache_stream_check`) |

`tb_way_halting_cache` runs 30,000 random loads and stores at the default
size, against a behavioural memory that stalls at random. It keeps a shadow
copy of every tag the controller writes. For every lookup, it works out the
exact set of ways that must open and whether the lookup must hit, and
compares both with `ways_opened` and `lookup_hit`. It also checks every load
value, the one-cycle hit latency, and that a miss is answered with the last
refill word. It counts each of these mechanisms and fails if any never
happened:

* load hit;
* refill;
* store hit and store miss;
* eviction;
* ways halted on a hit;
* all ways halted on a miss;
* a way opened without a hit;
* back-to-back hits;
* memory stalls.

`tb_cache_workloads` depends on one property: halting changes nothing but
activity. The 2-, 3- and 4-bit versions of the cache therefore run in
lockstep on the same stream. The testbench checks that they see identical
hits and cycle counts, and that each extra halt bit opens no more ways.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_way_halting_cache \
  -y rtl -y tb +libext+.sv rtl/whc_pkg.sv tb/tb_way_halting_cache.sv -o sim
./obj_dir/sim
```

Replace the top module and file name for any other testbench. Every
testbench finishes in a few seconds.

## How far it follows the original design, and where it departs

This RTL follows the original design in:

* the organisation: 8 KB, four ways, 32-byte lines, a 6/21/5 address split;
* four halt bits in a 64 x 4 fully associative array per way;
* static XOR/NOR comparators;
* word lines gated by the halt match through a NAND and inverter pair;
* a single shared decoder;
* one comparator per way, and one output mux;
* one 32-bit word read per access;
* random replacement.

This implementation's own choices are:

* the two-edge clocking of a lookup;
* valid bits kept in the halt tag array;
* the decoder enable;
* the whole controller: refill order, response timing, write-through with
  no allocation, invalid-first victim choice, the LFSR;
* the handshakes, the byte enables, and the activity outputs.

What is not modelled:

* Circuit details: transistor sizing, SRAM cells, sense amplifiers,
  precharge and write drivers, and the dual-rail inputs of the comparator.
  The SRAMs are behavioural arrays with a one-cycle read.
* Physical organisation of the SRAMs: the split of the data memory into
  subarrays, and pulsed word lines that limit bit-line swing. Both save
  energy in silicon but do not change the logic.
* Page alignment (page colouring). A cache that is virtually indexed and
  physically tagged needs the operating system to make the low virtual and
  physical tag bits agree, so that the halt search can start before address
  translation. That is outside the cache and not built here; the cache
  simply uses the tag bits it is given.
* Energy itself: only the activity that drives it (`ways_opened`) is
  produced.

## Changing it

All sizes are parameters of `way_halting_cache`:

* `CACHE_BYTES`, `LINE_BYTES` and `WAYS` must give a power-of-two number of
  sets.
* `WORD_W` must be a multiple of 8.
* `HALT_BITS` can be any value below the tag width. Two to four bits are the
  interesting range.
* With `WAYS` a power of two, the LFSR chooses victims uniformly.

The defaults live in `whc_pkg`.
