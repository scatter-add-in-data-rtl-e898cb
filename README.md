# Hardware scatter-add for a data-parallel memory system

Many data-parallel kernels end by *scattering with addition*: for every
element `i`, `a[idx[i]] += v[i]`. Histograms, sparse matrix-vector products
in element-by-element form, and force accumulation in molecular dynamics all
have this form. On a wide SIMD or stream processor the hard part is
collisions: two lanes, or two elements of one stream, may add to the same word
at almost the same time. Done in software, each update is a read, an add and
a write. Two updates to one word then race, so the software must sort the
indices, keep private copies of the output, or lock.

This RTL moves the read-modify-write into the memory system. Each cache bank
gets a small *scatter-add unit* with three parts: an adder (64-bit integer or
IEEE double), a few entries of buffer (the *combining store*) and a
controller. The processor sends a scatter-add request: an address and a value.
The unit fetches the word, adds, writes it back and acknowledges the request.
The processor never waits for the data, and no two additions to one word can
interleave wrongly.

The central trick is **chaining**. Suppose several requests to the same word
are in the unit at once. Only the first reads memory. The others wait in the
combining store. When a sum leaves the adder, the unit looks for a waiting
request to the same word. If it finds one, the sum goes straight back into
the adder with that request's value, instead of going to memory. Only the
last sum of the chain is written. A run of `n` updates to a hot word
therefore costs one read, one write and `n` additions, spaced one adder
latency apart. Updates to different words overlap fully, up to the number of
store entries.

## Block structure

```
 address generators (2)                      cache banks / memory (8, outside)
   ag_valid/ready/req ─┐                       ▲ mem_req_*      │ mem_resp_*
   ag_ack_cnt  ◄───┐   │                       │                ▼
                   │   ▼                  ┌────┴────────────────────┐
                   │ sa_bank_xbar ──────► │ sa_unit (one per bank)  │ x8
                   │  bank = addr[2:0]    │  sa_ctrl                │
                   │  round robin         │  sa_combining_store     │
                   └──── ack per source ──│  sa_fu ── fp64_add      │
                                          └─────────────────────────┘
```

| file | what it is |
|---|---|
| `rtl/sa_pkg.sv` | shared types: request, memory request/response, event flags |
| `rtl/sa_top.sv` | one node's memory side: crossbar plus 8 units; counts acknowledgements per generator |
| `rtl/sa_bank_xbar.sv` | routes each generator request to the bank owning its address |
| `rtl/sa_unit.sv` | one scatter-add unit: store, controller, functional unit, port-turn bit |
| `rtl/sa_combining_store.sv` | the entries and their searches |
| `rtl/sa_ctrl.sv` | combinational controller: decides what moves each cycle |
| `rtl/sa_fu.sv` | pipelined adder, integer or double, with the entry tag travelling alongside |
| `rtl/fp64_add.sv` | combinational IEEE-754 binary64 adder |

Default configuration: 2 address generators, 8 banks, 8 combining-store
entries per unit, and a 4-cycle functional unit. Data words are 64 bits and
addresses are 32-bit word addresses. All of these are parameters of `sa_top`.

## The combining store

Each entry holds one accepted scatter-add that has not finished yet. Its
fields are the address, the value to add, the data type (integer or double)
and the number of the generator that sent it. Two state bits sit on top of
`valid`:

* `busy`: the entry's value is in the functional unit right now.
* `pend`: the entry needs a memory read that has not been sent yet, because
  the memory port was taken when the request arrived.

An entry is freed when its own addition leaves the functional unit. The
acknowledgement goes out in that same cycle. One entry therefore means one
outstanding request, and a full store stalls the generator.

The store is searched every cycle. All searches are combinational on the
registered entries, and each returns the lowest-numbered match:

| search | key | finds |
|---|---|---|
| arrival | request address | is *any* entry holding this address? (combine or fetch) |
| return | address of the word coming back from memory | a waiting (not busy) entry for it |
| finish | address of the sum leaving the adder | a waiting entry for it (recirculate or write back) |
| pending | — | an entry whose read is still to be sent |
| free | — | an empty entry |

**The invariant that makes it atomic.** Every address present in the store has
exactly one *current value*. That value is in one of three places: being read
from memory, inside the adder, or (between chains) in memory. A request whose
address is already present never reads memory. A sum goes back to memory
only when no entry for its address waits. While a chain for an address is
active, no second read of that address can start, and no write-back can
overwrite a value still being added to. The assertions in `sa_unit` check
two consequences of this. A word returning from memory always finds a
waiting entry. The data type never changes within a chain.

## The controller, cycle by cycle

`sa_ctrl` is purely combinational. Each cycle it sees up to three things: the
request from the crossbar, a word returning from memory, and a sum leaving
the adder. It decides as follows.

1. **Sum leaving the adder.** The sum's entry is freed and its source
   acknowledged.
   * If the finish search finds a waiting entry, the sum *recirculates*. It
     re-enters the adder in the same cycle with that entry's value, and the
     entry becomes busy.
   * Otherwise the sum is written back on the memory port. If the port cannot
     take it, the whole adder pipeline holds (`fu_en` low) and nothing is lost.
2. **Word returning from memory.** It enters the adder with the value of a
   waiting entry for its address, unless a recirculating sum has taken the
   adder's single issue slot or the pipeline is held. Then it waits
   (`mem_resp_ready` low).
3. **Request.**
   * A plain write passes straight to the memory port (the bypass).
   * A scatter-add is accepted whenever an entry is free. If the arrival
     search hits, it simply waits in the store (combining, no memory access).
     If it misses, its read is sent at once if the port is free and no older
     read is pending. Otherwise the entry is marked `pend`, and the read
     goes out later from the store.

**Memory-port order.** The port carries one access per cycle, and four
sources compete for it:

1. the write-back of a finished sum;
2. a plain write;
3. a pending read from the store;
4. the read of the request arriving now.

There is one exception, which is the subtle part. A one-bit register in
`sa_unit`, `rd_turn`, is set when a write-back wins while a read is pending.
While it is set, that read goes before the next waiting write-back. Without
it, a store full of finished sums writes them all back in one burst. Every
new read then waits behind the whole burst, and the unit runs in lock-step
batches. With a 256-cycle memory and 64 entries, that cost about 50% of the
throughput. With the turn bit, reads and write-backs interleave, and long
latencies are hidden as soon as there are enough entries (see the results
below).

**Same-address hold.** A new scatter-add may arrive for the very address
whose sum is leaving the adder in that cycle. The arrival search cannot yet
tell whether that sum will recirculate or be written back, so the request
waits one cycle. Afterwards it either joins the chain (the sum
recirculated) or misses. If it misses, its read goes out after the
write-back on the in-order port, so it reads the new value.

**Why reads can be pending.** Accepting a scatter-add only when the port is
free would tie the input rate to the memory port. Every miss would then block
the requests behind it, including ones that could simply combine. With the
`pend` bit a request stalls only when the store is full. While reads queue,
later requests to the same words combine in the store. This is what makes a
small index range cheap in memory traffic.

## Acknowledgements and ordering

Every scatter-add is acknowledged to the generator that sent it, when its own
addition completes. Several banks may finish in the same cycle, so `sa_top`
gives each generator a per-cycle count, `ag_ack_cnt`. A generator knows its
scatter-add instruction is done when it has counted one acknowledgement for
each request. `idle` is high when no combining store holds an entry.

The order in which updates to one word are added is not program order. It
depends on memory timing. It is deterministic for a given input and timing,
but integer results are exact and double results can differ in the last bits
from a sequential sum. Plain writes bypass the unit. Software must therefore
not mix a plain write with unfinished scatter-adds to the same word. This
RTL does not order them against each other.

## The functional unit

`sa_fu` forms the sum combinationally at its input and carries it through
`FU_LATENCY` registers, together with a tag: entry index, address and type.
A synthesis tool with retiming spreads the adder over those stages. One
addition can be issued per cycle. A held pipeline keeps every stage.

Integers add modulo 2^64. Doubles use `fp64_add`, a full IEEE-754 binary64
adder:

* The operands are ordered by magnitude, and the smaller is aligned with
  guard, round and sticky bits.
* After the add or subtract, the result is normalised and rounded to nearest
  even.
* Subnormal inputs and outputs are exact.
* Overflow gives an infinity.
* Any NaN input, or inf − inf, gives the quiet NaN `0x7FF8000000000000`.

## Banks and the crossbar

The bank of a word is its address modulo 8, the low three bits (word
interleaving). Each bank arbitrates round-robin between the generators that
want it this cycle. Requests to different banks move in the same cycle. There
is no queue: a generator whose bank is busy keeps its request valid. An index
stream that lands in one bank runs at one bank's rate. Histograms with 1–4
bins show this clearly.

## Interfaces and timing

All interfaces are valid/ready: a transfer happens on a cycle with both high.

* `ag_req` has an op (write or scatter-add), a type (int or double), an
  address and 64-bit data.
* `mem_req` has a write-enable, an address and data. Each unit issues at most
  one per cycle, in order. The bank side must apply them in that order, and
  must not make `mem_req_ready` depend on `mem_req_valid`.
* `mem_resp` carries read data with its address. Responses may arrive in any
  order.
* A scatter-add to an idle unit is acknowledged memory latency +
  `FU_LATENCY` cycles after it is presented. Further updates to the same word
  follow every `FU_LATENCY` cycles.
* The crossbar adds no cycles.
* Reset is asynchronous and active low. It clears the store, the adder
  pipeline, the arbiter pointers and the turn bit.
* `bank_ev` reports per-cycle event flags for each bank: bypass, full-store
  stall, combine, read, recirculation, write-back, held return and
  same-address hold. They are meant for counters.

## Relation to the published design

This RTL follows the published scatter-add organisation in these points:

* one unit per cache bank;
* a combining store used both as miss buffer and as combining buffer;
* a search of the store on arrival, on return and on completion;
* recirculation of a finished sum to a waiting request of the same address;
* write-back only at the end of a chain;
* bypass of plain writes;
* a stall only on a full store;
* acknowledgement once the addition is complete;
* the default sizes (8 banks, 8 entries, 4-cycle adder, 2 address
  generators).

The following are this design's own choices:

* the handshakes;
* three parallel searches plus a pending search. The original notes that one
  search would do with an ordering mechanism in the store; that is not
  built.
* the memory-port priorities and the turn bit;
* the same-address hold;
* the pipeline hold on a blocked write-back;
* the bank function and round-robin arbitration;
* the IEEE details of the adder.

Not built:

* the cache banks and DRAM interface themselves (the memory port is brought
  out instead);
* the alternative placement of a single unit at the memory controller;
* the multi-node path (network interface, remote scatter-add, and cache
  combining with sum-back of cached partial sums);
* the suggested extensions (min/max, multiply, fetch-and-add returning the
  old value).

Ordinary reads are assumed to take the normal load path, not this unit.

## Verification and measured behaviour

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/sa_mem_model.sv` is a
behavioural model of a bank with its memory. It has a fixed latency plus
optional random extra latency (so returns can come back out of order), a
minimum interval between accesses, and optional random refusals.

| testbench | what it checks |
|---|---|
| `tb_sa_fu` | 20,000 random int/double additions (subnormals, infinities, NaN, cancellation) against the simulator's own double arithmetic; exact latency |
| `tb_sa_combining_store` | every search, every cycle, against a model of the entries under random legal updates |
| `tb_sa_ctrl` | 50,000 random input combinations against the rules above, written out independently; every rule must occur |
| `tb_sa_unit` | latency = memory + adder; 64 updates to one word cost 1 read, 1 write, 64 × 4 cycles; distinct-address throughput within 15% of the bound from the entry count; random stress with out-of-order returns and port refusals; all 8 events seen |
| `tb_sa_bank_xbar` | routing, tagging, ready, round-robin alternation, parallel moves |
| `tb_sa_top` | full default configuration: histograms of 32,768 elements over 2,048 and 16 bins, 8,192 double adds over 1,024 words, every bin compared; every mechanism counted (bypass, full stall, combine, read, recirculation, write-back, held return, same-address hold, crossbar conflict, several banks in one cycle) |
| `tb_sa_apps` | histograms of 16,384 and 32,768 elements over 1 to 4M bins, of 256 to 8,192 elements over 2,048 bins (run time must grow linearly), of 1,024 and 32,768 elements over 128 to 8,192 bins; a 38,000-update double stream over 10,240 words (the size of an element-by-element sparse matrix-vector product); a 590,000-update stream over 8,192 words (the size of a water-molecule force kernel). Index streams are synthetic and uniform |
| `tb_sa_sensitivity` | one unit per configuration: 2–64 entries, memory latency 8–256, adder latency 2–16, memory interval 1–16, 16 vs 65,536 bins |

Results at the default configuration:

* With banks that take one access per cycle at a 16–24-cycle read latency,
  the node sustains
  about 1.45–1.55 additions per cycle from two generators.
* A single-bin histogram drops to 0.25 per cycle. One bank serialises on its
  4-cycle adder. With 4 bins the rate is 0.83 per cycle, since only 4 of the
  8 banks work.
* The bank model has no cache, so these runs do not show the extra cost of
  bin ranges too large for an on-chip cache.

From `tb_sa_sensitivity`, 512 updates over 65,536 bins with one memory access
every 2 cycles. The floor is 512 × 2 accesses × 2 cycles = 2,048 cycles:

| entries | mem 8 | mem 16 | mem 64 | mem 256 | adder 2 | adder 8 | adder 16 |
|---|---|---|---|---|---|---|---|
| 2 | 4,095 | 6,143 | 18,431 | 67,583 | 5,631 | 7,167 | 9,215 |
| 4 | 2,055 | 2,993 | 9,109 | 33,799 | 2,739 | 3,495 | 4,517 |
| 8 | 2,047 | 2,057 | 4,555 | 16,919 | 2,053 | 2,066 | 2,479 |
| 16 | 2,047 | 2,047 | 2,327 | 8,503 | 2,047 | 2,048 | 2,050 |
| 64 | 2,047 | 2,047 | 2,047 | 2,355 | 2,043 | 2,048 | 2,051 |

From 16 entries on, the adder latency no longer matters. With 64 entries even
a 256-cycle memory costs only 15%.

No store size helps when memory itself is the limit. With one access every
16 cycles and 65,536 bins, every size takes about 16,370 cycles, which is the
time of the 1,024 accesses alone.

With only 16 bins, updates combine in the store. With 64 entries a run needs
148–380 memory accesses instead of about 1,024. It is 1.8× faster than the
65,536-bin run with one access per cycle, and 3.5–5.8× faster with slower memory.

## Simulating

Any testbench runs with plain Verilator 5 (`--timing` is needed for the
testbench delays). For example:

```
verilator --binary --timing --assert rtl/sa_pkg.sv rtl/*.sv \
    tb/sa_mem_model.sv tb/tb_sa_top.sv --top-module tb_sa_top -o sim
./obj_dir/sim
```

Adjust the file list as needed:

* `tb_sa_apps` and `tb_sa_unit` also need `tb/sa_mem_model.sv`.
* `tb_sa_sensitivity` needs `tb/sa_mem_model.sv` and `tb/sa_sens_run.sv`.
* `tb_sa_fu`, `tb_sa_combining_store`, `tb_sa_ctrl` and `tb_sa_bank_xbar`
  need only `rtl/`.

All run in seconds.

In the testbenches, inputs change and outputs are sampled at the falling
clock edge, away from the rising edge where the design moves. Use the same
practice when adding tests.

To change the configuration, set `NUM_AG`, `NUM_BANKS`, `CS_ENTRIES` and
`FU_LATENCY` on `sa_top`:

* `NUM_BANKS` should be a power of two (bank = low address bits).
* The source tag is 4 bits, so `NUM_AG` ≤ 16.
