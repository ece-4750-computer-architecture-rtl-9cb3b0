# A quad-core PARC system with a banked shared data cache and ring networks

This design joins four simple in-order cores into one multicore. Each core has a
private instruction cache. All four cores share one data cache, split into four banks.
Consecutive cache lines sit in different banks, so the four cores spread their
accesses over all four banks. Three small networks tie the caches together:

* a **data-cache network** carries each core's loads and stores to the bank that
  owns the address, and carries the answer back to the core;
* an **instruction refill network** merges the line requests of the four
  instruction caches onto memory port 0;
* a **data refill network** merges the line requests of the four data-cache banks
  onto memory port 1.

Each network is a pair of four-node rings: one for requests, one for responses.
Software tells the cores apart by reading two coprocessor registers: the number
of cores and the core's own id. With those, it splits the work, for example one
quarter of an array per core. Core 0 is the only core wired to the outside world
(the "manager").

```
            memreq0/memresp0                          memreq1/memresp1
                   |                                         |
        +----------+----------+                   +----------+----------+
        | instruction refill  |                   |  data refill net    |
        | net (single bank)   |                   |  (single bank)      |
        +--+-----+-----+----+-+                   +-+-----+-----+-----+-+
           |     |     |    |                       |     |     |     |
        icache0 icache1 icache2 icache3          dcache0 dcache1 dcache2 dcache3
           |     |     |    |                       |     |     |     |
         proc0 proc1 proc2 proc3 ---dmem--->  data-cache net (bank = addr[5:4])
           |
        manager (mngr2proc / proc2mngr)
```

## Files

| file | contents |
|---|---|
| `rtl/mcore_pkg.sv` | memory message structs, core count, coprocessor register numbers, reset vector |
| `rtl/proc_cache_net_alt.sv` | the top: 4 `proc`, 4 instruction `cache`, 4 data `cache` banks, 3 `mem_net` |
| `rtl/proc.sv` | five-stage bypassing processor |
| `rtl/cache.sv` | blocking direct-mapped write-back cache, 1 or 4 banks |
| `rtl/mem_net.sv` | request ring + response ring + adapters |
| `rtl/mem_req_net_adapter.sv`, `rtl/mem_resp_net_adapter.sv` | wrap memory messages into network messages |
| `rtl/ring_net.sv`, `rtl/ring_router.sv` | four-node bidirectional ring |
| `rtl/queue.sv`, `rtl/rr_arb.sv` | FIFO and round-robin arbiter helpers |
| `tb/tb_*.sv` | self-checking testbench for each module |
| `tb/test_mem_4B.sv`, `tb/test_mem_16B.sv` | behavioural test memories (simulation only) |
| `tb/parc_asm_pkg.sv` | instruction encoders used to write test programs |

## Memory messages and how a response finds its way home

Every memory interface is a valid/ready stream of a packed struct from
`mcore_pkg`:

| field | request | response |
|---|---|---|
| `typ` | 3 bits: `MEM_READ` = 0, `MEM_WRITE` = 1 | same as the request |
| `opaque` | 8 bits, returned unchanged by every cache and memory | |
| `addr` | 32 bits | (no address) |
| `test` | | 2 bits; caches set bit 0 on a hit |
| `len` | 2 bits for 4-byte messages (0 = word, 1 = byte, 2 = halfword), 4 bits for 16-byte messages (0 = whole line) | same |
| `data` | 32 bits (`*_4B_t`) or 128 bits (`*_16B_t`) | |

Processors talk to caches with 4-byte messages. Caches talk to memory with
16-byte lines.

Routing through a network uses no extra state. The address picks the bank. The
opaque field picks the way back:

1. `mem_req_net_adapter` on requester port *i* computes the destination bank. In
   banked mode this is `addr[5:4]`. In single-bank mode it is always node 0. The
   adapter writes *i* into `opaque[7:6]`, then prepends `{dest, src}` to the
   request.
2. The request ring delivers the message to the destination node. The header is
   stripped there, and the bank sees an ordinary request.
3. The bank answers. It keeps the opaque field, so `opaque[7:6]` still names the
   requester. `mem_resp_net_adapter` turns those bits into the destination of
   the response message.

The top two opaque bits therefore belong to the network. A requester should use
only `opaque[5:0]`, and it gets its response back with `opaque[7:6]` set to its
own port number. The processor always sends opaque 0. A cache sends opaque 0 on
its refill requests.

Requests are split in two steps. The data-cache network picks the bank. The bank
then picks the line inside it:

```
 31            10 9     6 5    4 3    2 1    0
+----------------+-------+------+------+------+
|   tag (22 b)   | index | bank | word | byte |
+----------------+-------+------+------+------+
```

An instruction cache has one bank, so its index is `addr[7:4]` and its tag is 24
bits. A data-cache bank built with `p_num_banks = 4` skips the two bank bits:
its index is `addr[9:6]` and its tag is 22 bits. Every address that reaches a bank
has the same bank bits. So when a bank writes back a dirty victim, it takes the
bank bits from the current request.

## Ring network

`ring_router` has three ports: the terminal, the clockwise link and the
counter-clockwise link. A message is one flit. The destination node is in its top
two bits.

* **Routing.** Each message takes the shortest path: one hop in either direction.
  For the opposite node (two hops), the message always goes clockwise. A message
  never changes direction, and all messages from one source to one destination
  take the same path, so they arrive in order.
* **Buffering.** Terminal input goes through a two-entry queue. Each ring
  direction has a two-entry output queue, and the head of that queue is the next
  router's input. Terminal output leaves the switch directly.
* **Arbitration.** Each output has a round-robin arbiter. Its pointer advances
  only when a grant is used.
* **Deadlock freedom (bubble flow control).** A message already moving in a
  direction may enter that direction's output queue when one entry is free. A
  message injected from the terminal needs two free entries. So each direction of
  the ring always keeps one free slot, and messages in the ring can always move.
  Requests and responses use separate rings, so a blocked request can never hold
  up the response that would unblock it.
* **Timing.** With no contention, delivery takes 1 cycle to the node itself, 2
  cycles for one hop and 3 cycles for two hops. `ring_router` includes
  deliberately ready-depends-on-valid paths (`*_in_rdy` depends on `*_in_val`);
  valid never depends on ready.

`mem_net` puts one request ring, one response ring and four of each adapter
together. With `p_single_bank = 1`, only bank-side port 0 is used. The top ties
ports 1 to 3 off.

## Cache

`cache` is blocking (one request at a time), direct-mapped, write-back and
write-allocate. It has 16 lines of 16 bytes. The states are:

| path | states | processor sees |
|---|---|---|
| hit | IDLE (accept) → TAG_CHECK → DATA_ACCESS → WAIT | response valid in the 3rd cycle after the accepting cycle, i.e. a 4-cycle hit |
| clean miss | … → REFILL_REQ → REFILL_WAIT → DATA_ACCESS → WAIT | + memory round trip |
| dirty miss | … → EVICT_REQ → EVICT_WAIT → REFILL_REQ → … | + two memory round trips |

The next request is accepted in the cycle after the response leaves. Byte and
halfword writes merge into the word with a byte mask. Reads return the addressed
bytes shifted down to bit 0, and the processor sign- or zero-extends them.

The four-cycle hit dominates single-core performance: a fetch takes four cycles.
A faster hit path would be the first thing to improve.

## Processor

`proc` is a five-stage pipeline:

* **F** keeps one instruction request in flight. A redirect sets a drop flag, and
  the response of a squashed fetch is thrown away when it arrives.
* **D** decodes and reads registers, with bypasses from X, M and W (in that
  priority). It resolves `j`, `jal`, `jr` and `jalr`, and squashes F.
* **X** runs the ALU, including a one-cycle `mul`, `div`, `divu`, `rem` and `remu`.
  It resolves branches (a taken branch squashes D and F) and sends the data
  memory request. It also sends `mtc0 $x,$2` messages to the manager and updates
  the stats bit.
* **M** waits for the data response and sign- or zero-extends loaded bytes and
  halfwords.
* **W** writes the register file. It pulses `commit`.

Loads are bypassed from W only. An instruction that uses a load result waits in
D while the load is in X or M. There are no branch delay slots. Execution starts
at `0x200`.

Coprocessor-0 moves:

| instruction | effect |
|---|---|
| `mfc0 $x, $1` | take the next word from the manager input stream (waits for it) |
| `mtc0 $x, $2` | send `$x` to the manager output stream |
| `mtc0 $x, $21` | stats bit = (`$x` != 0) |
| `mfc0 $x, $16` | `$x` = `p_num_cores` |
| `mfc0 $x, $17` | `$x` = `p_core_id` |

Instruction encodings are MIPS32 encodings for the PARCv2 integer set (see the
header of `rtl/proc.sv` for the list). `div/divu/rem/remu` use the SPECIAL2
opcode (`0x1c`) with funct `0x1a/0x1b/0x1e/0x1f`. Those four encodings are a
choice of this design: check them against your toolchain before running compiled
code. Encodings the decoder does not know run as no-ops.

## Top level: `proc_cache_net_alt`

The top has no parameters. Its ports:

* `mngr2proc_*` / `proc2mngr_*`: 32-bit manager streams, wired to core 0 only. The
  manager input of cores 1 to 3 is never valid, so a `mfc0 $x,$1` on those cores
  waits forever. Their manager output is accepted and dropped, so a
  single-threaded test run on all cores reports only through core 0.
* `memreq0_*` / `memresp0_*`: instruction refills.
* `memreq1_*` / `memresp1_*`: data refills and write-backs. Both ports carry
  16-byte messages. They may point at one shared memory.
* `stats_en`: core 0's stats bit.
* `commit[3:0]`: one retired-instruction pulse per core.

There is no coherence logic, and none is needed: the data cache is shared, and
the instruction caches only read. Self-modifying code is not supported.

The single-core baseline, one `proc` with one instruction `cache` and one data
`cache` (`p_num_banks = 1`) wired straight to the two memory ports, can be built
from the same modules. It is not included here.

## Simulating

Each testbench is self-contained. It prints `TB_RESULT checks=N failures=M` and
ends. With Verilator 5, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/mcore_pkg.sv tb/parc_asm_pkg.sv tb/tb_proc_cache_net_alt.sv \
    --top-module tb_proc_cache_net_alt -Mdir obj_top
./obj_top/Vtb_proc_cache_net_alt
```

To run another testbench, swap in its file and `--top-module` name. List
`tb/parc_asm_pkg.sv` only for `tb_proc` and the top.

| testbench | what it shows |
|---|---|
| `tb_proc` | a hand-written program covering ALU ops, shifts, mul/div, bypassing, a load-use stall, byte and halfword memory ops, every branch and jump, and all coprocessor moves; the expected values are computed in the testbench, and the memory has random delays |
| `tb_cache` | 400 random word, halfword and byte accesses each against a 1-bank and a 4-bank cache with a reference model; forced conflicts and write-backs; every re-read must hit with the 4-cycle timing |
| `tb_ring_router` | routing of every input/destination pair; the bubble rule with a blocked link |
| `tb_ring_net` | zero-load latency of all 16 pairs; 1200 messages at full rate with random back-pressure: no loss, no duplication, in order per pair, no deadlock |
| `tb_mem_req_net_adapter`, `tb_mem_resp_net_adapter` | destination, source and opaque rewriting |
| `tb_mem_net` | a banked 4-byte network with four banks, and a single-bank 16-byte network, each with four concurrent requesters checked against reference models |
| `tb_proc_cache_net_alt` | four cores run a parallel vector add over 64 elements, and core 0 reduces the result and reports it; the testbench checks the result and counts each mechanism (refills, write-backs, refill-network contention, bank contention, every core reaching every bank, load-use stalls, branch squashes, the stats bit, instructions on every core) |
| `tb_sort_workload` | the same sort program run twice on the full system: scalar (core 0 sorts 64 signed words, the other cores stop) and parallel (each core insertion-sorts its quarter, then core 0 merges the quarters with three merge calls); all 64 results are checked against a reference sort |
| `tb_selfcheck_workload` | a self-checking single-threaded instruction test run on all four cores at once, as the single-threaded tests run on the multicore: the program checks 33 results against constants and reports pass or the failing step; only core 0 reaches the manager, and each core stores to its own data block |

Sorting 64 words takes about 39,000 cycles on one core. With four quarter-sorts
and three merges it takes about 11,900 cycles, a speedup of about 3.3×. Both
figures count the cycles with the stats bit set. The insertion sort is
quadratic, so each quarter costs about a sixteenth of the whole-array sort. The
merges run on core 0 alone and take most of the parallel time.

In the end-to-end run, the 64-element parallel vector add with its reduction takes
about 4,500 cycles. Core 0 retires about 630 instructions, and each other core
about 450. The three arrays map onto the same data-cache sets, so nearly every
access misses. This is a stress test, not a benchmark.

## How far to trust it, and where it is this design's own

The system structure follows the description it was built from:

* four cores, four private instruction caches and four shared data-cache banks;
* the two-bit bank field between the index and the line offset;
* the requester id carried in the high opaque bits;
* the `p_single_bank` and `p_num_banks` roles;
* 32-bit processor ports and 128-bit memory ports;
* a four-cycle cache hit;
* core 0 alone on the manager ports;
* the stats, core-count and core-id registers.

The insides of the processor, the cache and the ring router were not given
there. This design supplies its own:

* the pipeline organisation and its bypass and stall rules;
* the instruction encodings, including the assumed `div`/`rem` encodings;
* the manager register numbers `$1` and `$2` and the reset vector `0x200`;
* direct mapping (inferred from the 4-bit index and no way bits), write-back and
  write-allocate;
* bidirectional shortest-path routing with bubble flow control, queue depths and
  round-robin arbitration;
* the network header layout `{dest, src, message}`;
* the message field widths other than the data width.

Struct arrays replace the concatenated port vectors of the original network
interface.

Every module has a testbench whose checks fail when the module is replaced by an
empty one or by a deliberately broken copy. The design has run only hand-written
programs, not compiled C. Compiled code will run only if the toolchain's
encodings match the ones above.
