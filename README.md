# On-chip COMA memory system for a Microgrid of microthreaded cores

This is synthesizable SystemVerilog for the memory system of a many-core chip.
The memory system is a Cache Only Memory Architecture (COMA) built on chip.
There is no home node for any address. Every level-2 cache is an *attraction
cache* (AC): it serves its own processors, and it also serves requests that
pass it on a ring. So a line lives wherever it was used last. Off-chip memory
is touched only when no cache on the chip holds the line, or when a dirty line
is evicted.

The design follows the architecture and protocol described by L. Zhang and
C. Jesshope in "On-chip COMA Cache-coherence protocol for Microgrids of
Microthreaded Cores". That description names the blocks, the request types and
the cache and directory states. It leaves routing, races, flow control and all
sizes open; this design fills them in. The section "What comes from the
architecture, and what is this design's own" below lists which is which.

## The structure

```
 proc  proc  proc  proc        (NP processors, each with a 1 KB L1)
   \    |     |    /
    snoop bus
        |
   attraction cache  --+-- AC --+-- AC --+-- directory g      level-1 ring of group g
                                                |             (unidirectional)
   directory 0 -- directory 1 -- ... -- directory NG-1 -- root directory
                                                               |
                                                      memory controller -- off-chip memory
                                                level-2 ring
```

- **L1 cache** (`l1_cache`): 1 KB, direct mapped, 32-byte lines. Lines are
  either Valid or Invalid. It is write-through and does not allocate on a write.
  A miss does not block: every request carries a 16-bit register/family tag,
  which comes back with the answer.
- **Snoop bus** (`snoop_bus`): joins NP L1s to one AC. It grants one request
  per cycle, round robin, and stamps the request with the L1's number.
  - Answers go back to the L1 whose number they carry.
  - Every granted write invalidates the line in the other L1s.
  - The AC's own invalidations go to all L1s.
- **Attraction cache** (`attraction_cache`): 256 sets x 4 ways of 32-byte
  lines. Line states are M, O, S and I, plus ReadPending (RP) and
  WritePending (WP). A request that reaches a pending line is parked in the
  **suspended request queue** (`suspended_queue`).
- **Directory** (`directory`): one per group. It holds no data. It keeps, per
  line, whether the group holds it: IN (not at all), SH (shared, maybe also
  elsewhere) or EX (only in this group). From that it decides whether each
  message stays on its ring or crosses to the other one.
- **Root directory** (`root_directory`): the same kind of table for the whole
  chip. It decides when a request has to leave the chip.
- **Memory controller** (`memory_controller`): turns off-chip reads into
  replies, and write-backs into writes.
- **Top** (`coma_top`): three groups of three ACs, and four processors per AC.
  Every ring link is one register stage.

## Messages and the request types

All ring traffic is one struct, `ring_msg_t`, defined in `coma_pkg.sv`. It holds:

- the kind
- the line address
- the requesting cache's {group, index}
- four routing flags
- a deflection marker
- a 256-bit line of data

The ten request types are these:

| name | meaning | produced by |
|---|---|---|
| LR / LW | local read / write | a processor (through L1 and bus) |
| RS / SR | read for a shared copy / its reply | AC miss / the AC or memory answering |
| RE / ER | read for an exclusive copy / its reply | AC write miss / the owner or memory |
| IV | invalidate all other copies | AC write to an S or O line |
| DE | the IV back at its issuer: exclusivity won | (a returning IV) |
| BR | evict a line | AC replacement |
| WB | write a dirty line back to memory | eviction of an O or M line |

A request travels round its group's ring. The first cache that can answer it
*replaces* it in the same slot with the reply: an RS becomes an SR carrying
the line, and an RE becomes an ER. The reply keeps the requester's
{group, index} and goes on round the ring until that requester takes it. An
IV travels the whole way round and invalidates every copy it passes. When it
reaches its issuer again, it acts as DE.

### Routing flags

The routing flags track how far a request has got. They are the least obvious
part of the design:

- `lap`: the request came back to its issuer unanswered, and is going round
  the group again. The group directory then knows that the group does not
  have the line after all. It sends the request up and corrects its own
  entry to IN.
- `up_done`: the request has already been sent to the level-2 ring once.
- `mem`: the request came back to its own group after a full level-2 tour,
  went round the group again, and is still unanswered. The root directory
  then fetches the line from memory, whatever its table says.
- `defl`, `defl_id`: the node `defl_id` could not accept the message. This
  happens when its queue is full or its crossing FIFO is full. The message
  goes round the ring once more, and every other node passes it untouched,
  until it reaches that node again.

## Attraction cache protocol

The transitions (the full list is in the header of `attraction_cache.sv`):

```
I  --LR / RS-->  RP  --SR-->  S            I  --LW / RE--> WP
S  --LR; RS / SR-->  S                     S  --LW / IV--> WP
S  --IV; BR; RE / ER; ER-->  I             WP --DE; ER-->  M
M  --LR; LW-->  M      M --RS / SR-->  O   O  --LR; RS / SR--> O
O  --LW / IV--> WP     M, O --RE / ER; ER; IV; BR / WB-->  I
RP, WP: LR, LW, IV (and the RE of a write-race winner) are parked
```

Notation: `event / action`. "`S --RS / SR--> S`" means that an S line seeing
an RS on the ring answers it with SR and stays S.

The cache handles two things in each cycle:

1. **The ring slot.** The message in front of the cache is examined, and then
   forwarded, replaced by a reply, consumed or parked, all in the same cycle.
2. **One secondary operation**, on a different set:
   - *Drain.* When a reply resolves a pending line, the line goes on a drain
     FIFO. Its parked requests are then served one per cycle, in arrival
     order. A drained request may lock the line again. For example, a parked
     write on an S line issues IV and makes the line WP again. The rest of
     the queue then waits for that reply.
   - *Local request.* A hit is answered one cycle after it is accepted. A miss
     chooses a victim: a free way first, otherwise round robin over the ways
     that are not pending. If the victim is O or M, its WB goes out first. The
     cache then issues RS or RE and parks the request itself. So every local
     miss is answered through the drain path.

Outgoing messages wait in a small FIFO. A message from the FIFO goes onto the
ring only when the cache has freed the slot in front of it.

### Write races

Two caches may write the same line at once. Each has an IV (or RE) on the
ring while its own line is WP, and the two caches see the two messages in
opposite orders. The rule that settles this: **the lower {group, index}
wins.**

- The winner parks the loser's IV or RE in its queue. It releases it after
  its own write is done.
- The loser passes the winner's message on. It marks its own line "nodata",
  because its copy may now be stale. When its own IV comes back, the loser
  turns it into an RE, so it gets the winner's data before it writes.

Two more rules keep the data moving:

- An IV that reaches an O or M line leaves as an ER carrying the line, so
  the writer always ends up with current data.
- A WP line that still has its data answers RS.

With these rules a wait always points from the loser to the winner, so a
cycle of waits cannot form.

### Suspended request queue

The queue is organised like the cache:

- **Queue table.** Each set has a queue table of 4 entries: tag, head
  pointer, tail pointer.
- **Request buffer.** It is shared (16 slots by default). Each slot holds a
  request and a next pointer. The slots of one line form a linked list.
- **Free list.** An empty-queue-head pointer (EQH) threads the free slots into
  a list of their own.

In each cycle the queue can take one push and one pop on different lines, and
both can happen in the same cycle. A request that cannot be parked is handled
in one of two ways:

- A ring request is deflected.
- A local request is simply not accepted yet.

## Directory routing

Here *ini* means "issued by a cache of this group".

| message | from | state | goes |
|---|---|---|---|
| ini RS | below | SH or EX (EX becomes SH) | stays in group |
| ini RS | below | IN, or `lap` set (entry becomes IN) | up |
| ini RE, IV | below | EX | stays |
| ini RE, IV | below | SH or IN (becomes EX) | up |
| ini request back from its tour | below | any | stays (it is on its way home) |
| ini SR / ER / request | above | - | down (an SR makes the entry SH, an ER makes it EX) |
| foreign RS/RE/IV/ER | above | SH or EX | down |
| foreign RS/RE/IV/ER | above | IN | passes on the level-2 ring |
| foreign anything | below | - | up (RS/RE/IV/ER leave the entry IN, SR leaves it SH) |
| WB | below | - | up, to the root |

Two more mechanisms keep the directory safe and moving:

- **Overflow.** A directory set that had to drop an entry sets an overflow
  bit. From then on, a line it does not know counts as SH. A lost entry can
  then only cost an extra lap, and never a missed invalidation.
- **Crossing FIFOs.** Messages that cross rings wait in small FIFOs, one for
  each direction. A full FIFO still takes a message in a cycle when its own
  head leaves. So two messages crossing in opposite directions always swap,
  and the two rings cannot lock each other.
- **Deflection.** In two cases a message goes round its ring once more:
  - a message from above that shares a set with the message from below in
    the same cycle;
  - a crossing message that finds its FIFO full.

The root directory sends a request off chip in these cases:

- an RS or RE that finds the line IN;
- any request marked `mem`;
- every WB.

If the memory controller is busy while a memory reply is waiting, the root
keeps the request in a one-entry hold register. The reply then gets the ring
slot, so replies always make progress.

## What comes from the architecture, and what is this design's own

These parts follow the architecture:

- two-level unidirectional rings joined by group directories;
- a root directory on the level-2 ring that decides about off-chip traffic,
  with the memory controller behind it;
- snooping buses between the L1s and their AC;
- 1 KB Valid/Invalid L1 caches with tagged, non-blocking requests;
- the ten request types;
- the MOSI states plus ReadPending/WritePending, with no Exclusive state;
- the directory states IN/SH/EX;
- the suspended request queue: per-set queue table, linked request buffer,
  empty-queue head;
- the 4-entry sets of the cache data table and the queue table;
- a group that holds a line exclusively keeps RE traffic on its own ring.

These parts are this design's own:

- all widths;
- the 32-byte line;
- all table sizes except the 4-way sets;
- the message format and the routing flags;
- ring order and one-cycle links;
- the write-race rule;
- the ER answer to an IV at an O/M line;
- deflection;
- the directory overflow bit;
- the crossing FIFOs;
- the root's hold register;
- round-robin bus arbitration;
- write-through L1s.

### Departures and omissions

- The directory has no suspended request queue of its own. The architecture
  gives directories one too. Here a directory never locks a line, so nothing
  needs parking. Its own requests can, however, take extra laps.
- The L1 does no prefetching, although the architecture mentions "buffering
  and prefetching". It has no write-back mode either.
- Location Consistency is what the protocol provides, and no more.
  - Per line: requests parked on a line are served in arrival order.
  - Across lines: no order is kept.
  - Nothing stronger, such as sequential consistency, is promised or tested.
- The processors are not part of this design. Nor is the network that
  configures processor clusters. The processor ports are brought out at the top.
- The off-chip memory is external. `tb/offchip_mem.sv` is a behavioural model
  of it, used only by the testbenches.

## Parameters (defaults)

| module | parameter | default | notes |
|---|---|---|---|
| `coma_top` | `NG`, `APG` | 3, 3 | groups, caches per group (the drawn configuration) |
| `coma_top` | `NP` | 4 | processors per cache (the architecture suggests 4 to 8) |
| `coma_top` | `AC_SETS`, `AC_WAYS`, `AC_QD` | 256, 4, 16 | 32 KB per cache |
| `coma_top` | `DIR_SETS`, `DIR_WAYS` | 512, 8 | 4096 entries per group directory |
| `coma_top` | `RD_SETS`, `RD_WAYS` | 1024, 16 | 16384 entries in the root |
| `coma_top` | `L1_BYTES` | 1024 | |
| `memory_controller` | `DEPTH` | 4 | requests queued / reads in flight |

The widths are fixed in `coma_pkg.sv`:

- 32-bit byte address and 32-bit word;
- 32-byte line, so a 27-bit line address;
- 4-bit group and index numbers;
- 16-bit request tag.

The tables are written as arrays. Synthesis turns them into flip-flops or
memories, depending on the tool and the target.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb_suspended_queue` | random pushes and pops against a queue-per-line model; buffer and queue table run full |
| `tb_l1_cache` | random reads and writes over twice the cache size, with invalidations; hit/miss predicted by shadow tags, data against a memory model, 1-cycle hit latency |
| `tb_snoop_bus` | random requests with back-pressure; grant order against a round-robin model; answer routing, write snoops, fairness |
| `tb_memory_controller` | random RS/RE/WB with the memory model behind; reply kind, requester, data, order, counts |
| `tb_root_directory` | random level-2 traffic against a state model; off-chip decisions, hold register, deflection, overflow |
| `tb_directory` | directed walk of one line through IN, SH, EX and back; every routing row above, same-set clash, full crossing FIFO |
| `tb_attraction_cache` | directed protocol walk: parked reads, hit latency, remote reads of S/M/O lines, IV and DE, remote RE, lap, full queue (deflection), lost write race, eviction with write-back |
| `tb_coma_top` | the whole chip at its default size, 36 processors; see below |

`tb_coma_top` runs the whole system with every parameter at its default. The
off-chip memory model has a 30-cycle read latency. Each processor keeps
several loads and stores in flight. The test runs in phases, and each phase's
results are predicted by a reference memory:

1. all processors read the same lines;
2. private writes;
3. remote reads of modified lines;
4. four processors in different groups write one shared line at once;
5. everybody reads that line back;
6. one cache overfills a set, causing evictions and a write-back;
7. two caches of one group pass a line back and forth.

The test counts each mechanism from the event outputs and fails if one never
happens:

- L1 hits;
- parked requests;
- deflections;
- write-backs;
- lost races;
- directory crossings in both directions;
- requests the directories kept inside their group;
- off-chip reads and writes.

A run takes about 20 seconds.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_coma_top -Mdir obj \
  rtl/coma_pkg.sv rtl/suspended_queue.sv rtl/attraction_cache.sv rtl/directory.sv \
  rtl/root_directory.sv rtl/memory_controller.sv rtl/l1_cache.sv rtl/snoop_bus.sv \
  rtl/coma_top.sv tb/offchip_mem.sv tb/tb_coma_top.sv
./obj/Vtb_coma_top
```

The unit testbenches need only `coma_pkg.sv`, their own block and, for the
attraction cache, `suspended_queue.sv`. The memory controller's testbench
also needs `offchip_mem.sv`.

### How far to trust it

The protocol has been exercised by the directed and random tests above, not
proven. The write-race rule and the routing flags are the parts most likely
to hide a corner case. They were written to keep every wait pointing from a
loser to a winner and every ring able to drain. Still, the end-to-end test
covers only a handful of racing lines, not long random mixes. The race and
queue logic is where to look first after a change.
