# C-processor instruction cache in SystemVerilog

A processor fetches its instructions much faster than main memory delivers
them. This RTL puts a 4 KByte instruction cache between the instruction unit
of a 32-bit processor (the "C-processor") and its bus unit. It also hides part
of the memory latency. After every request it serves, it checks whether the
*next* transfer block is already on chip. If the block is missing, it starts
fetching it in the background ("prefetch lookup on hits"). A real miss stops
such a prefetch at once and turns the fetcher over to a demand fetch.

Beside the cache, the top level holds a set of small circuits that the same
design flow uses as building examples. These are an operator, a Mealy machine,
a two-system bus with an arbiter, signal semaphores, scan flip-flops and a
PLA-decoded register. They share no logic with the cache.

## Organisation

| item | value |
|---|---|
| quad | 32 bits, the unit of every transfer |
| address | 46-bit quad address |
| transfer block (TB) | 8 quads, the unit fetched from the bus unit |
| block | 32 quads = 4 TBs, the unit that carries a tag |
| associativity | 2 ways, 16 sets, LRU replacement |
| capacity | 2 × 16 × 32 = 1024 quads = 4 KByte |

The address is split as follows:

```
 45            9 8     5 4   3 2    0
+---------------+-------+-----+------+
|   tag (37)    | set(4)| TB  | word |
+---------------+-------+-----+------+
```

All these sizes are constants in `icache_pkg`. The tag width follows from the
others.

There are two memories.

* **Tag/status memory** (`ic_tag_status_ram`). It has one 142-bit row per set,
  holding both ways: a 37-bit tag plus a 34-bit status word per way. The
  status word is the LRU bit, a block-valid bit and one data-valid bit per
  quad of the block. The per-quad valid bits allow a block to be only partly
  present, so a demand fetch need not fetch a whole block. Keeping both ways in
  one row means a single read answers "hit in which way, and which quads are
  valid".
* **Data RAM** (`ic_data_ram`). It has 128 rows of 256 bits, each row one TB,
  addressed by `{set, way, TB}`. It has a single port.

Around these sit two 8-quad buffers:

* the **read buffer** (`ic_read_buffer`) holds a copy of the last TB read from
  the cache, with its valid bits;
* the **fetch buffer** (`ic_fetch_buffer`) holds the TB being fetched from the
  bus unit, filled slot by slot.

The **status register** (`ic_status_reg`) holds the TB address of each buffer
and the prefetch address PrefAdd.

## The server: answering the instruction unit

The instruction unit asks for two consecutive quads: DataLow at the given
address and DataHigh at the next one. It holds `iu_request` and the address.
The cache raises `iu_ready1` when DataLow is valid and `iu_ready2` when both
are valid. It holds them until the instruction unit pulses `iu_ack`.

`ic_server` looks up one quad per phase in three places. It tries the fetch
buffer first, then the read buffer, then the cache.

* **Buffer hit.** The quad is latched at once.
* **Cache hit.** The server reads the whole TB from the data RAM into the read
  buffer, marks the way most recently used, and then finds the quad in the
  read buffer. Later quads of the same TB are then buffer hits.
* **Quad belongs to the TB the fetcher is filling.** The server waits for it
  to arrive in the fetch buffer.
* **Miss.** The server pulses StartFetcher as soon as the fetcher can accept a
  demand fetch, then waits as above.

Cycle counts from `iu_request` at the default timing:

| case | `iu_ready1` | `iu_ready2` |
|---|---|---|
| both quads in a buffer | 2 | 3 |
| one cache hit (pair in one TB) | | 5 |
| two cache hits (pair spans two TBs) | | 7 |

## The fetcher and its state machine

The fetcher (`ic_fetcher`) is the most intricate part. Its pieces talk over an
11-bit control bus `C<0:10>` (struct `fctrl_t`):

| bits | signal |
|---|---|
| C0 | Request |
| C1 | StartFetcher |
| C2 | TransferBlockHit |
| C3 | Ready |
| C4..C7 | QuadPointer |
| C8..C9 | State |
| C10 | CacheHit |

**FController** (`ic_fcontroller`) is a four-state Mealy machine. Its state
code is also the DemandOrPre code that tells the MMU what is being fetched:

| state | code | meaning |
|---|---|---|
| Rest | 00 | idle |
| PreF | 01 | prefetching the next TB |
| DemF | 10 | demand fetch for a miss |
| DemF3 | 11 | one cycle: a miss arrived during a prefetch |

Transitions, checked in this priority order:

1. **→ Rest:** no StartFetcher, quad pointer = 9 (buffer full), state PreF or
   DemF, and no CacheHit.
2. **→ DemF:** StartFetcher in Rest or DemF, or StartFetcher in PreF just as
   the prefetch completes (quad pointer = 9).
3. **→ DemF3:** StartFetcher in PreF while the prefetch is still running
   (quad pointer ≤ 8).
4. **→ PreF:** in Rest with Request, no StartFetcher, the next TB nowhere on
   chip (no TransferBlockHit), and quad pointer 0.
5. **Otherwise** the state holds, except that DemF3 always moves on to DemF.

**Quad pointer.** A 4-bit register in each sub-fetcher, incremented through a
lookahead-carry incrementer (`ic_inc4`). Values 1..8 address the next
fetch-buffer slot, 9 means "buffer full", and 0 means idle.

**Prefetcher** (`ic_prefetcher`).
* It starts the pointer at 1 and asks the bus unit for 8 quads (Count = 7).
* At pointer 9 it raises LoadCache. `ic_cache_update` then works out the new
  tag/status row and the way to write (see below), and the fetch buffer is
  written to the data RAM.
* If a miss arrives mid-prefetch (DemF3), the prefetcher writes only the quads
  that have arrived, with their valid bits, and pulses Cancel to the bus unit.
  The demand fetch starts on the next cycle.

**Demand fetcher** (`ic_demand_fetcher`).
* It fetches from the missing quad to the end of its TB: the pointer starts at
  word + 1 and Count = 7 − word.
* The demand fetch makes its way most recently used.

**Fetch comparators** (`ic_fetch_comparators`) produce TransferBlockHit. The
next TB counts as present if its address matches:
* the fetch buffer's address (43-bit compare);
* the read buffer's address (43-bit compare);
* a valid block of its set (two 37-bit tag compares) whose eight data-valid
  bits for that TB are all set.

**Fetch merge** (`ic_fetch_merge`) selects the prefetcher's or the demand
fetcher's quad pointer, bus signals and cache update, using the two state
bits. In DemF3 it takes the quad pointer from the demand side and the cache
update from the prefetch side.

**Cache update, way choice.** Ways are picked in this order:
1. the way whose valid tag matches;
2. else an invalid way;
3. else the least recently used way.

A replacement writes the new tag, sets block-valid, and clears all 32
data-valid bits before the fetched quads' bits are ORed in.

## Data RAM arbitration

Server reads and fetcher writes compete for the single data RAM port. The
server always wins a simultaneous access.

* **Posted writes.** A fetcher write goes into a one-entry pending register.
  It is written on the first cycle without a server read.
* **Bypass.** A server read of the row held in the pending register gets the
  pending quads merged into its data. The tag/status row already claims those
  quads, so without the merge the read could return stale data.
* **Refusal.** If a second write arrives while one is still pending and the
  server reads in the same cycle, the old write is done first and the server
  is refused (`srv_gnt` low) for that cycle. The server sees no cache hit in
  that cycle and looks the quad up again in the next.

## Interfaces of the cache (`icache`)

* **Instruction unit:** `iu_request`, `iu_address`, `iu_ack`, `iu_ready1/2`,
  `iu_data_low/high`.
* **Bus unit:**
  * `bu_valid` is a one-cycle pulse that comes with `bu_address` (quad address
    of the first wanted quad) and `bu_count` (quads − 1).
  * The bus unit returns the quads in order, one per `bu_ready`, on `bu_data`.
  * `bu_cancel` is a one-cycle pulse that drops the rest of a prefetch.
  * After a cancel the bus unit must send no more quads of that transfer. The
    cache ignores a quad that arrives in the same cycle as the cancel.
* **MMU:** `demand_pre` (the FController state code) and `pref_add` (the
  prefetch address, always the first quad of a TB).
* **Observation:** `ev_*` pulses mark cache, fetch-buffer and read-buffer hits,
  waits, StartFetcher, bypass, refusal, TransferBlockHit and pending writes.
  They exist for testing and can be left open.

All state is reset by the asynchronous active-low `rst_n`. The clock is
`clk`, rising edge. The data RAM array is not reset. Its contents are never
read before the valid bits say so.

## The example circuits

| module | what it is |
|---|---|
| `ex_operator` | 7-bit combinational operator under a 2-bit control. `default` (control 00): in1, incremented when `ready` is high, into bits 4..0 and in2[1:0] into bits 6..5. `generate` (any other control): in2[1:0] into bits 1..0, and into bits 6..2 either in2 with bits 2 and 3 cleared (when in2 = 5) or the constant 31. |
| `ex_mealy` | Three-state Mealy machine A/B/C with a 2-bit input and a 2-bit output, from a state table. |
| `ex_comm_system`, `ex_comm_arbiter`, `ex_comm` | Two systems, each with an 8-bit down-counter `gen`, an OUT register with a read/write bit, an IN register and a two-state controller, sharing one 8-bit bus. A system posts `gen` when its parity is even and its two low bits are zero, then waits until the arbiter has moved the word. The arbiter alternates priority (Prio1/Prio2) and does a test-and-reset of the read/write bits. The shared bus is a multiplexer. |
| `ex_signal` | Signal semaphore in four kinds (`KIND`): pulsed, level, level/pulsed and pulse/level. Set beats reset. The pulse flip-flop resets to 0 and the level flip-flop to `LEVEL_INIT`. |
| `ex_scan_ff` | Scan D flip-flop with pins TST, D, DT, CK, NRST → Y, NY. The reset is asynchronous. |
| `ex_scan_ff_en` | Scan flip-flop with enable, pins TST, EN, D, DT, CK → Q, NQ. TST overrides EN. |
| `ex_pla_register` | 4-bit register loaded through an 8-term PLA from an 8-bit control word. The values of the matching terms are ORed, and the register holds when no term matches. |

## Where this RTL departs from the original design, or fills gaps

* **TimeOut and page fault** from the bus unit are not implemented. The bus
  unit is assumed always to deliver.
* **Arbiter details.** The original design only fixes that the server has
  priority over the fetcher. Posted writes, the bypass and the refusal are
  this design's own choices.
* **Server timing.** The server's cycle-level timing and its internal split
  are this design's own. The original splits the server into comparator
  blocks and two combinational blocks; here it is one state machine (idle,
  look, load, done).
* **Handshakes.** Pulse widths, the Count encoding (quads − 1) and the
  Request/Ack handshake timing are assumed.
* **Gate-level drawings.** The quad-pointer logic and the merge logic were
  drawn at gate level in the original. They are written here as behavioural
  RTL with the same function: a 4-bit incrementer with lookahead carries, and
  4:1 multiplexers selected by the state.
* **Tag/status memory.** The original had to split it into four narrow
  memories (two tags, two status words, 16 words each) because its tool could
  not build memories wider than 64 bits. This RTL keeps the architectural
  choice of one 142-bit row per set. The four fields are still separate
  fields of the row.
* **TransferBlockHit.** The original defines it as "next TB is in the cache"
  and brings out the fetch-buffer and read-buffer compares only for test. Here
  it is the OR of all three, because a TB already held in a buffer needs no
  prefetch either.
* **Rest condition.** The FController returns to Rest only when CacheHit is
  low, as its condition table states.
* **Mealy example.** Where the example's output table and its state table
  disagree, the state table is followed. Unlisted input combinations hold the
  state and output 00.
* **Communication example.**
  * The "post" condition is even parity with the two low bits zero.
  * The counting direction and reset value of `gen` (counts down, resets to
    FF) are assumed.
* **PLA register.** Bit 7 of the control word is the leftmost character of
  the PLA patterns.
* **Not included.** The bus unit, MMU and instruction unit are outside the
  cache and are not included. The testbenches carry a behavioural bus-unit
  model with identity address translation.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops. It also has a watchdog. With
Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/icache_pkg.sv \
    tb/tb_cproc_icache_top.sv --top-module tb_cproc_icache_top
./obj_dir/Vtb_cproc_icache_top
```

Replace the testbench file and the top module name to run another one. The
package is named first; Verilator finds every other module through `-y`
because each file is named after its module. The full-size top testbench
builds in a few seconds and simulates in well under one.

| testbench | what it covers |
|---|---|
| `tb_cproc_icache_top` | Whole top at default size. It runs random and sequential instruction streams through the cache against a reference memory, and drives every example against its own model. It counts 22 mechanisms and fails if any never occurs: demand fetch, prefetch, prefetch stopped by a miss (DemF3) with Cancel, cache/read-buffer/fetch-buffer hits, server waits, replacement, a server read while a write is pending, a next TB already present, and each example's modes and states. |
| `tb_icache_trace` | The cache in a copy of its original functional test bench: 7168 quad-pair requests, a 2048-word memory whose words hold their own 11-bit addresses, a compare on every Ack, a clock counter and an 8-entry error FIFO. The trace is generated as a program-like stream (straight runs, loops, jumps, four tag segments). It runs in about 51,000 clocks, 5.15 clocks per request. |
| `tb_icache` | Cache alone, with a bus unit of varying latency and gaps between quads. |
| `tb_ic_server`, `tb_ic_fetcher`, `tb_ic_prefetcher`, `tb_ic_demand_fetcher` | The cache with checks aimed at one sub-block, including the cycle counts above. |
| `tb_ic_*` (the rest) | One block each, driven at random against a model written separately. |
| `tb_ex_*` | One example each. |

The bus-unit model (`tb_bus_unit_model`) returns
`mem[a] = a[31:0] ^ a[45:32] ^ 32'h5A000000` for quad address `a`. Its
`LATENCY` parameter sets the cycles from Valid to the first quad. `GAPS`
inserts random idle cycles between quads. With `MEM_AW` = 11 it keeps only the
low 11 address bits, and every word holds its own address (used by
`tb_icache_trace`).
