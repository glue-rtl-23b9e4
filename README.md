# Glue: a directory-based MESI memory hierarchy for four processors

Four processors each get a private, write-back L2 cache. The four L2s share
one last-level L3 cache, and the L3 is also the coherence directory. The L2s
and the L3 talk over a small three-plane network using MESI messages. The L3
sits in front of main memory.

The central idea is that no controller ever waits inside an action. Each
incoming message is paired with the state of its line and handled in one
short, non-blocking step. Anything that must wait is parked, either in a
transient line state or in a one-entry buffer. New messages keep flowing
meanwhile.

The design follows the Glue hierarchy, which was built with high-level
synthesis for the ESP tiled SoC platform. This is a hand-written
SystemVerilog implementation of that architecture. It is not the original
generated RTL.

```
 CPU0/L1   CPU1/L1   CPU2/L1   CPU3/L1        processor ports (cpu_req / cpu_rsp / l1_inv)
    |         |         |         |
 [L2 #0]   [L2 #1]   [L2 #2]   [L2 #3]         l2_cache: 64 sets x 8 ways, 16-byte lines
    \_________|____ glue_noc ___|_____/        request / forward / response planes
                      |
                  [L3 + dir]                   l3_cache: 64 sets x 32 ways, inclusive
                      |
                 main memory                   mem_req / mem_rsp port
```

## Messages and planes

All traffic inside the hierarchy uses one message struct, `msg_t`, defined in
`rtl/glue_pkg.sv`. It has these fields:

- type
- source node and destination node (L2s are nodes 0–3, the L3 is node 4)
- 28-bit line address
- 128-bit line
- 4-bit word mask
- `excl` and `dirty` flags

The network keeps three independent planes. A message on one plane can never
be blocked behind a message on another, and that is what makes the protocol
deadlock-free.

| plane    | direction      | messages |
|----------|----------------|----------|
| request  | L2 → L3        | GETS, GETM, PUTS, PUTM, NC_RD, NC_WR |
| forward  | L3 → L2        | FWD_GETS, FWD_GETM, INV, PUT_ACK |
| response | any → any      | DATA (with `excl`), DATA_DIR (owner → L3, with `dirty`), INV_ACK, NC_DATA |

In FWD_GETS and FWD_GETM, the `src` field names the cache that asked for the
line. The owner sends DATA straight to that cache. On FWD_GETS the owner also
sends a DATA_DIR copy to the L3.

Every channel, including the processor and memory ports, is a valid/ready
handshake. All flops use an asynchronous active-low reset `rst_n`.

## L2 cache: a non-blocking coherence FSM

`l2_cache` is built from these parts:

- **`l2_frontend_if`**: turns processor requests into messages and merges the
  two response streams back to the processor.
- **`l2_backend_if`**: holds one FIFO per network plane and direction.
- **`l2_invalidate_if`**: passes invalidated line addresses on to the L1.
- **`l2_serializer`**: picks one message per cycle for the FSM, in priority
  order: responses, then forwards, then processor requests. It also sends
  non-cacheable traffic around the FSM.
- **`l2_fsm`**: the coherence FSM.
- **`l2_tag_bank`**: tags and line states.
- **`cache_data_bank`**: line storage.

The FSM handles a message in two cycles:

1. A tag lookup returns hit, way and state.
2. One action runs. It may answer the processor, write the data bank, update
   the tag, and emit up to two network messages. It never waits for an answer.

The FSM takes a message only when every buffer that message's action could
write has room. The room check is made per message type. Forwards and INV
therefore never wait for space in the request FIFO. Without this, an L2 whose
request FIFO is stuck behind a busy directory could refuse the very INV that
the directory is waiting for.

Transient states hold everything that is in flight:

- **`IS_D`, `IM_D`, `SM_D`**: waiting for data after GETS, after GETM from I,
  or after GETM from S (an upgrade).
- **`MI_A`, `SI_A`, `II_A`**: waiting for PUT_ACK. `II_A` means the line was
  given away by a forward while the PUT was still in flight.

Four small buffers cover the rest:

- **Read buffer.** The processor blocks on reads, so one outstanding read
  miss is enough. Its line goes back to the processor when the DATA arrives.
- **Write buffer (1 entry).** A write that misses, or that hits a Shared
  line, is acknowledged at once and GETM is sent. The word waits here and is
  merged into the line when DATA arrives. A second such write waits until the
  buffer drains, and so does a read of the same line. Reads of other lines go
  ahead.
- **Forward buffer (1 entry).** A FWD_GETS, FWD_GETM or INV can arrive for a
  line that is still waiting for its own data. It is parked here and retried
  after the next DATA. While this buffer is full, the serializer stops taking
  forwards. Further forwards then queue in the backend FIFO, and the response
  plane keeps moving.

  There is one exception: an INV for a line in `SM_D` is answered at once,
  and the line moves to `IM_D`. The directory may be collecting that very
  acknowledgement before it can serve this cache's GETM.
- **Replay register (1 entry).** A processor request that cannot be served
  yet waits here, with the frontend blocked. This happens when the line is
  transient, the write buffer is busy, or a victim is being evicted. The
  request is retried after the next network message has been handled.

**Eviction.** When a set is full, the tag bank's eviction plane names a
stable victim. It uses a rotating pointer and does not change the victim's
state. The FSM then does the following:

1. It sends PUTM (from M or E, with the line) or PUTS (from S).
2. It moves the victim to `MI_A` or `SI_A`.
3. It parks the original request in the replay register.
4. When PUT_ACK arrives, the way is freed and the request is retried.

**Flush.** A processor flush empties the whole L2. The FSM starts the tag
bank's flush scan, which offers every valid, stable entry on the flush plane.
The FSM writes each offered entry back in the same way as an eviction, but
only in cycles when no other message is waiting. Flushing is background work.

The scan repeats until every entry is invalid. It waits on lines that are
transient, because their PUT_ACK has not yet arrived. It then raises
`flush_done`, and the processor gets its FLUSH answer.

**Invalidation.** Every FWD_GETM, and every INV that removes a copy, pushes
the line address into `l2_invalidate_if`. That address goes to the L1, which
may hold the line too.

**Non-cacheable accesses.** These never enter the FSM. The serializer turns
them into NC_RD or NC_WR messages to the L3. A non-cacheable write is answered
when it is sent; a read is answered when NC_DATA returns.

## L2 tag bank

Each entry holds a state and a tag. The bank has three output planes:

- **Nominal plane.** A lookup compares the tag against all ways of the set at
  once, like a CAM. It answers one cycle later with hit, way and state. On a
  miss it names an empty way if one exists.
- **Eviction plane.** On a miss in a full set, it names a stable victim.
- **Flush plane.** It offers entries, one at a time, to be written back.

Only the FSM writes states. The tag bank never changes a line's coherence
state on its own.

## L3 directory

`l3_cache` has the same structure as the L2. The frontend is the network and
the backend is memory.

The L3 has as many sets as an L2 and 4 × 8 = 32 ways. A set therefore always
contains a way that no L2 holds, once the requesting L2 has made room for the
line. As a result, the L3 never has to recall a line from an L2. It is
inclusive of all L2s.

Each L3 entry holds:

- a tag
- the directory state
- a dirty bit
- an owner
- a sharer bit per L2

The directory FSM (`l3_fsm`) handles each request as follows:

| request | line state | action |
|---------|-----------|--------|
| GETS | not present | read from memory (`IS_D`), then DATA with `excl`: the L2 gets E |
| GETS | no L2 copy (`I`) | DATA with `excl` |
| GETS | shared | DATA, add the sharer |
| GETS | owned (`EM`) | FWD_GETS to the owner (`EM_D`). The owner's DATA_DIR copy then makes the line shared; `dirty` is kept if the copy was modified |
| GETM | not present | read from memory (`IM_D`), then exclusive DATA |
| GETM | no other copies | exclusive DATA |
| GETM | other sharers | one INV per cycle to each (`S_A`). Count INV_ACKs, then send DATA |
| GETM | owned | FWD_GETM to the owner, record the new owner |
| PUTS / PUTM | any | remove the sender. A PUTM from the owner stores the line and sets `dirty`. Always answered with PUT_ACK. A PUT from a cache that has already lost the line is only acknowledged |

The L3 writes a line back to memory only when it evicts that line and the
line is dirty. The write-back goes out ahead of the fill that replaces it, in
the same memory request stream.

A request that meets a transient line is parked in a one-entry replay
register. While it is parked, `req_block` holds the whole request plane.
Responses and memory fills keep flowing, so the transient line always
resolves. The parked request is then retried.

Non-cacheable requests go straight to memory. They carry the tag
`{1, requesting L2}`, so the answer comes back as NC_DATA to the right L2.
Cacheable fills use tag 0.

## Network

`glue_noc` is combinational:

- **Request plane.** A round-robin arbiter merges the four L2s onto the L3's
  input.
- **Forward plane.** A demultiplexer on `dst`.
- **Response plane.** A full crossbar with one round-robin arbiter per
  destination.

Messages from one source to one destination on one plane stay in order.

## Timing

Latencies are measured from the cycle the L2 accepts a request to the cycle
its answer is valid, with the default configuration:

| access | this design | target of the original HLS design |
|--------|-------------|---------------------|
| read hit | 3 | 12 |
| write hit | 3 | 4 |
| read miss, lower levels answering at once | 7 (13 when a victim is evicted first) | 46 |
| write miss (acknowledged at once) | 3 (up to 11 while the write buffer drains) | 40 |

The testbenches check these bounds. The tag bank answers every lookup in one
cycle; the original design bounds tag-bank latency at 3 cycles for a read hit
and 7 in general.

## Parameters

Sizes live in `glue_pkg` and as module parameters.

| parameter | default | origin |
|-----------|---------|--------|
| `NUM_L2` / top `N` | 4 | four processors, as in the original system |
| `L2_WAYS` / top `L2_W` | 8 | the original L2 associativity |
| `L3_WAYS` / top `L3_W` | `N * L2_W` = 32 | chosen so the L3 never recalls |
| `L2_SETS` / top `SETS` | 64 | own choice |
| line | 4 words × 32 bits | own choice |
| address | 32-bit byte address, 28-bit line address | own choice |

## Where this differs from the original design

- **Several requesters on one transient L3 line.** The original design groups
  readers and passes the line among waiting writers by forwards. Here, waiting
  requests are served one at a time, in arrival order, through the replay
  register. Coherence is kept; the grouping and ordering policy is not
  reproduced.
- **Invalidation acknowledgements** are collected by the directory, which
  then sends the data. The requester does not collect them.
- **Data bank.** The original design merged the data bank into the FSM to
  save a cycle. Here the data bank is a separate module, but its read is
  combinational, so it adds no cycle.
- **Not built:** the processor, the L1s, the AMBA bus between L1 and L2, and
  main memory. Their connections are ports of `glue_top`.
- **No L3 flush.** The L3 has no flush, as in the original design.
- **Own choices:** the FIFO depths, message encodings, victim policy and
  arbitration.

## Files

- `rtl/glue_pkg.sv`: sizes, message and state types.
- `rtl/glue_top.sv`: four L2s, the network and the L3.
- `rtl/l2_*.sv`, `rtl/l3_*.sv`, `rtl/cache_data_bank.sv`, `rtl/glue_noc.sv`:
  the blocks.
- `rtl/glue_fifo.sv`: the FIFO used by every interface.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
- `tb/glue_mem_model.sv`: a behavioural memory with a fixed latency.

### The end-to-end test

`tb/tb_glue_top.sv` runs the top at its default sizes, in five phases:

1. A two-processor sharing sequence: P0 reads, P1 writes, P0 reads, P0
   writes, P1 reads.
2. The hit-latency checks.
3. Non-cacheable traffic.
4. Four processors issuing thousands of random reads, writes, flushes and
   non-cacheable accesses on shared lines. Each processor writes only its own
   word of a line. Every read is checked: the reader's own word must be its
   last write, and other words may never go backwards.
5. A full flush, followed by a read-back of every line.

The test counts L2 evictions, forward stalls, write-buffer stalls, flushed
lines, L3 fills, write-backs, invalidations, forwards, parked requests, L1
invalidations and non-cacheable accesses. It fails if any of them never
happened.

## Simulating

With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/glue_pkg.sv tb/tb_glue_top.sv \
          --top-module tb_glue_top -Mdir obj_top -o sim
./obj_top/sim +verilator+rand+reset+2 +verilator+seed+7
```

The end-to-end test finishes in well under a second. Any other testbench
builds the same way; replace `tb_glue_top` with its name.

The design uses only synthesizable constructs. Memories are written as
arrays. The tag arrays have an asynchronous reset of their state fields, so
they synthesize to flops, not RAM. Synthesis of the full-size L3 is therefore
slow.
