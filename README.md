# A small-area layer-2 Ethernet switch with one shared, linked-list cell memory

This is a 4-port (by parameter also 10-port) layer-2 switch whose design is
driven by silicon area, not speed. Each port moves one byte per clock on an
8-bit bus. At the reference 12.5 MHz core clock that is 100 Mbit/s per port.
The area saving comes from three ideas:

* **One memory, two passes.** A received frame is stored once before its
  destination is known, and once more after packet processing. Both copies
  live in the same cell memory. The packet-processing loop is just one more
  input and one more output of the buffer manager, so one set of read and
  write logic serves both passes.
* **Cells and linked lists instead of contiguous buffers.** Frames are cut
  into fixed-size cells. Cells are allocated one at a time and chained
  through a link memory. A frame can be written into the shared memory cell
  by cell while it is still arriving, so each port needs only a one-cell
  ingress buffer.
* **Free lists inside the link memories.** A free entry is never part of a
  frame, so the list of free cells can live in the same link memory as the
  frame chains. Only the head and tail addresses are kept in registers. The
  link memory runs at twice the core clock, which gives two accesses per core
  cycle: one for the free list and one for the frame chains. Freeing a whole
  frame takes a single link write, because its cells are already chained.

## Path of a frame

```
rx byte ─► sp_deser ─► ingress_buf ─┐                      ┌─► egress_buf[p] ─► ps_ser ─► tx byte
           (bytes→cell)  (1 cell)   ▼                      │    (1 frame)      (cell→bytes)
                               buffer_mgr  ──── pass 2 ────┘
                          (shared cell memory)
                                ▲  │ pass 1
                                │  ▼
                      pkt_proc ◄── egress_buf[N]   (loop: lookup, learning, priority)
```

1. `sp_deser` collects bytes into a `CELL_BYTES` cell. It marks the first and
   last cell of a frame and how many bytes are valid.
2. `ingress_buf` holds that one cell until the buffer manager takes it. The
   buffer manager writes one cell per clock and serves the ports round robin.
3. The buffer manager chains the frame's cells and keeps a *header* for it.
   When the last cell arrives, the frame joins the loop FIFO.
4. Frames in the loop FIFO are copied, one cell per clock, into the loop's
   egress buffer. `pkt_proc` then sees the Ethernet header in the first cell.
   It returns every cell one clock later, tagged with a destination port mask
   and a priority.
5. The returned frame is written into the shared memory a second time, now in
   the egress class. It is linked into one output queue per destination port,
   at its priority. A flooded frame sits in several queues but is stored once.
6. When a port's egress buffer is empty, the buffer manager copies the next
   frame into it. It serves the ports round robin and, within a port, picks
   the highest non-empty priority. After the last copy of a frame has left,
   its cells and header are freed.
7. `ps_ser` serialises the cells. The egress buffer holds a whole frame, so
   the next cell is always ready and a frame leaves without gaps.

## Choosing the cell size

Two limits pull the cell size in opposite directions.

*Lower limit (timing).* Loop cells cannot be held back, so they have priority
over port cells. A full-size frame of ⌈1522/C⌉ cells from the loop, plus one
cell from each of the N ports, must be written before any port finishes its
next cell, which takes C clocks:

    N + ⌈1522 / C⌉ ≤ C

This gives 42 bytes for 4 ports and 45 for 10. `sw_pkg::cell_timing_ok`
evaluates the condition, and `switch_top` refuses to elaborate if it fails.
The frequently quoted minimum of 41 bytes for 4 ports is one less than the
inequality gives: 4 + 38 = 42 > 41.

*Area.* Bigger cells waste more memory on the partly filled last cell and
make the converters larger. Smaller cells need more, and wider, link
pointers. The optimum is 61 bytes for 4 ports and 153 bytes for 10 ports.
The defaults use 61.

*Memory size.* The cell memory holds:
- one maximum frame per port in the first pass;
- in the second pass, (1 + 2 + … + N) maximum frames. This is enough for the
  worst-case "full overlap" traffic, where all ports send to one rotating
  destination.

    cells = ⌈1522/C⌉ · (N(N+1)/2 + N)   → 25 · 14 = 350 cells of 61 bytes (21 350 bytes)

Every frame needs a header, and a minimum 64-byte frame occupies ⌈64/C⌉
cells. So there are 350/2 = 175 headers. The queue memory has twice as many
entries (350), because a flooded frame occupies several queue entries.
`sw_pkg` computes all of these from `N_PORTS`, `CELL_BYTES` and
`MAX_PKT_BYTES`.

| configuration | cell | cells | headers | queue entries |
|---|---|---|---|---|
| 4 ports (default) | 61 B | 350 | 175 | 350 |
| 10 ports | 153 B | 650 | 650 | 1300 |

## The buffer manager (`buffer_mgr`)

### Memories

| memory | entries | content | link memory (2× clock) |
|---|---|---|---|
| cell data (`sdp_ram`) | N_CELLS | one cell | next cell of the frame, or next free cell |
| header data (`sdp_ram`) | N_HDRS | header | next frame in the loop FIFO, or next free header |
| queue data (`sdp_ram`) | N_QENT | header address | next entry of the same output queue, or next free entry |

A header (`hdr_t`) holds:
- destination mask, source port and priority;
- valid bytes in the last cell;
- first and last cell pointers;
- the cell count;
- a ready flag.

The first and last pointers let a whole frame be freed with one link write.
Each source (every port and the loop) has one *open* frame whose header is
being built. Frames from different ports therefore reach the memory
interleaved, cell by cell.

### Double-clocked link memory (`link_mem_2x`)

`clk_fast` must be exactly twice `clk`, with the rising edges aligned.

**Phase detection.** A flop toggles on every `clk` edge. Its value, sampled
on `clk_fast`, tells the memory which fast edge is mid-cycle.

**Port timing.**
- Port A acts on the mid-cycle edge.
- Port B acts on the edge that ends the core cycle.
- A port-A write is seen by a port-B read in the same core cycle.
- Read data of both ports appears in the next core cycle and holds until that
  port's next read.

**Port assignment.** In every link memory, port A belongs to the free list
(`free_list`). Port B belongs to the frame chains, the loop FIFO or the
output queues.

### Free lists (`free_list`)

**Pop.** A pop hands out the head. The head's successor is already
prefetched, so one pop per clock can be sustained.

**Append.** An append gives back a whole chain with one write,
`link[tail] = first`, and the tail moves to the chain's last entry. Special
cases are handled for an empty list and for a list of one entry.

**After reset.** Each list writes `link[i] = i+1` over `DEPTH` clocks. It
raises `init_done` when all entries are free.

### Input side: one cell per clock

A loop cell is taken whenever it is offered. Otherwise one port's ingress
cell is taken, round robin.

**Accepting a cell.**
- A first cell allocates a header and a cell.
- A following cell allocates a cell and is linked behind the previous one
  through port B of the cell link memory.
- The last cell writes the header. A first-pass frame then joins the loop
  FIFO. A second-pass frame is handed to a small job queue, which links it
  into each destination queue, one destination per cycle. The job queue
  holds 4 frames, or at more than 4 ports the next power of two at or above
  the port count, so a broadcast from every port fits at once.

**Admission rules.**
- First-pass frames may hold at most `CBI_RESERVE` = N·25 cells. This is one
  maximum frame per port, which is all the first pass ever needs when packet
  processing keeps up.
- Second-pass frames use the rest (250 cells). Each output is guaranteed
  `GUAR` = 25 cells, and anything beyond the guarantees (150 cells) is
  shared.
- A flooded frame counts against every output it goes to. A cell is refused
  when it would eat into another output's guarantee.

Because the two classes cannot take each other's cells, congestion at the
outputs never causes drops before packet processing.

**Drop reasons.** A frame is dropped for any of the following. Each has its
own one-clock event output.

| event | cause |
|---|---|
| `ev_drop_full` | no free cell or header |
| `ev_drop_guar` | class limit or output guarantee reached |
| `ev_drop_queue` | not enough free queue entries for all of its destinations |
| `ev_drop_lost` | a cell was lost before the buffer manager, or the frame exceeds `MAX_PKT_BYTES` |
| `ev_drop_filter` | packet processing returned an empty destination mask |

When a frame is dropped:
- its stored cells are freed with a single append;
- the rest of its cells are ignored;
- its header is returned.

### Output side: one frame at a time

**Choosing a frame.** A small state machine
(`O_IDLE → O_DEQ → O_DEQ2 → O_HDR → O_CELL… → O_FIN1 → O_FIN2`) picks one of:
- the loop FIFO, if the loop's egress buffer is empty. The loop comes first.
- otherwise, the next port whose egress buffer is empty, round robin, taking
  its highest-priority non-empty queue.

**Copying.** The machine reads the header and follows the cell chain,
copying one cell per clock into the egress buffer.

**Finishing.**
- After a port copy: the queue entry is freed and the port is removed from
  the header's mask.
- When the mask becomes empty, or after the loop copy: the frame's cells and
  header are queued for freeing. A 16-entry freeing queue absorbs bursts. It
  is drained whenever port A of the free list is not popping.

**Port conflicts.** The input side always wins port B of a link memory. The
output side then waits a clock (`ev_out_wait`).

**Other events.**
- `ev_loop_first`: a port cell was waiting while a loop cell was taken.
- `ev_mcast_keep`: a frame stays stored because further copies are due.
- `ev_flood` (from `switch_top`): packet processing flooded a frame.

## Port side

**`sp_deser`** writes each byte at its index in the cell register. A byte
flagged first restarts at index 0.

*Hand-shake (own choice).* A finished cell waits in the register until the
ingress buffer can take it. This matters for the short last cell of a frame:
a 64-byte frame is a 61-byte cell followed three clocks later by a 3-byte
cell. Without the hand-shake, four ports finishing frames together could
overwrite the single ingress cell. With it, the inter-frame gap gives the
buffer manager time.

*Overrun.* If a byte arrives while a cell still waits, the waiting cell is
discarded and the next cell carries a lost flag. The buffer manager then
drops the incomplete frame.

**`ingress_buf`** holds one cell, per the architecture.

**`egress_buf`** holds one whole frame: 25 cells plus their flags. It
releases the frame only when it is complete. The loop has its own instance,
so a loop transfer can never starve a port's serialiser.

**`ps_ser`** takes the next cell in the same clock as it sends the previous
cell's last byte.

## Packet processing (`pkt_proc`)

This is a deliberately minimal stand-in for full packet processing. It
contains a 16-entry MAC table.

**Forwarding.**
- A destination hit on another port forwards the frame to that port.
- A hit on the receiving port filters the frame.
- A miss or a group address floods the frame to all ports except the
  receiving one.

**Learning.** The source address is learned with its receiving port. A
matching entry is updated; otherwise entries are replaced round robin.

**Priority.** An 802.1Q-tagged frame gets the upper two bits of its PCP as
priority, where 3 is the highest. Untagged frames get priority 0.

**Timing.** The decision is made from the first cell. Every cell comes back
one clock later. Nothing in the frame is modified.

## Interface of `switch_top`

| port | meaning |
|---|---|
| `clk`, `clk_fast` | core clock and the edge-aligned double-rate clock for the link memories |
| `rst` | synchronous reset. Wait for `init_done` (≈ 350 clocks) before sending. |
| `rx_data[N]`, `rx_valid`, `rx_first`, `rx_last` | one byte per port per clock; first/last mark the frame boundaries. Frames are 2..`MAX_PKT_BYTES` bytes with no preamble or FCS. |
| `tx_*` | the same, outgoing. A frame leaves with no gaps between its bytes. |
| `ev_*` | one-clock event pulses, see above |

Parameters:
- `N_PORTS` (4)
- `CELL_BYTES` (61)
- `MAX_PKT_BYTES` (1522)
- `N_PRIO` (4)
- `N_CELLS` (derived)

The other sizes are derived inside `buffer_mgr` and can be overridden
there.

Synthesis of the default configuration (coarse, technology-independent)
gives:
- about 6 950 flip-flop bits;
- 252 499 bits in memories.

The original 4-port implementation reported 9 198 flip-flops and 236 575
memory bits. At 10 ports with 153-byte cells the same synthesis gives
about 1 008 700 memory bits, against 1 013 263 for the original. Our header also stores a priority and a cell count, which
accounts for most of the memory difference.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_switch_top` | Whole switch at the default parameters. The phases are: learning broadcasts; a mesh test (every port sends simultaneously to one destination that rotates each round, frames up to 1522 bytes, no drop allowed); all four ports at line rate with back-to-back 64-byte frames, no drop allowed; a filtered and an over-long frame; a broadcast storm; a runt storm towards one port. Afterwards, normal traffic must pass, and all cells, headers and queue entries must be free again. Each received frame is compared byte for byte, checked for destination, duplicates and order within (source, priority). Each mechanism must occur at least once: flood, filter, full and guarantee drops, lost frame, loop priority, output wait, multicast retention, priority overtaking, ingress wait. |
| `tb_switch_10port` | The same switch with 10 ports and 153-byte cells. It runs the learning broadcasts (all ten at once), the full-overlap mesh with frames up to 1522 bytes, and 1000 minimum-size frames at 42 % of line rate. No drops are allowed, and the same frame checks and memory-return checks apply. |
| `tb_buffer_mgr` | Small configuration: 8-byte cells, 5-cell frames and only 6 queue entries, so that every drop reason occurs, including the queue-memory drop (which cannot occur at the default sizes, see below). The testbench plays the ingress buffers, the loop and the egress buffers at cell level. It checks contents, order, all-or-nothing multicast, drop accounting and that the free lists are restored. |
| `tb_free_list` | Predicts every popped address with a reference FIFO. Covers back-to-back pops, draining to zero, appends to empty and one-entry lists, and appends held off by pops. |
| `tb_link_mem_2x` | Random two-port traffic against a model that applies port A before port B. |
| `tb_sp_deser`, `tb_ingress_buf`, `tb_egress_buf`, `tb_ps_ser` | Random frames. Cover held tail cells and overrun, back-to-back hand-over, whole-frame release, and gap-free output. |
| `tb_pkt_proc` | Reference model of the MAC table: hits, misses, group addresses, filtering, replacement, hosts moving between ports, VLAN priority. |
| `tb_sdp_ram`, `tb_sw_pkg` | Memory read/write behaviour; sizing functions and the cell-size condition. |

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_switch_top -Irtl -y rtl rtl/sw_pkg.sv tb/tb_switch_top.sv
./obj_dir/Vtb_switch_top
```

The whole-switch test runs in well under a second. With the default sizes,
the 160-frame mesh round and the 400 minimum-size frames at line rate complete with no drops.

Verilator's `-Wall` lint reports `DEF_*` constants of `sw_pkg` as unused
when a module that only imports functions is linted on its own. This is
harmless.

## Limits and departures

- **Queue-memory drop at default sizes.** The queue memory never runs out
  first. A frame needs one queue entry per destination but at least one
  guaranteed or shared cell per destination, and there are more queue
  entries (350) than second-pass cells (250). The drop path is still built
  and is exercised in `tb_buffer_mgr` with a smaller queue memory.
- **Own choices where the architecture is silent:**
  - the first-pass reserve of one maximum frame per port;
  - the per-output guarantee of one maximum frame, with the rest shared;
  - how multicast frames are charged against the guarantees;
  - the 16-entry freeing queue and the job queue;
  - the order of the output scheduler;
  - the extra header fields (priority, cell count);
  - the converter hand-shake.
- **Packet processing** only learns and looks up addresses. There is no VLAN
  membership, no frame modification and no aging.
- **No Ethernet MAC.** Preamble, FCS and inter-frame gap handling belong to
  a MAC outside this design. The testbenches leave 12 idle clocks between
  frames.
- **10-port configuration.** It is obtained with `N_PORTS=10, CELL_BYTES=153`
  and is simulated by `tb_switch_10port`, but not at every load. The buffer
  manager spends about 14 core cycles per single-cell frame (ingress write,
  two loop passes, egress read). Ten ports sending 64-byte frames back to
  back offer one frame every 7.6 cycles, so they see guarantee drops. About
  half of line rate is lossless (42 % is tested). Long frames are not
  affected, because their per-byte cost is low: the full-overlap mesh with frames up to
  1522 bytes runs without loss at ten ports.
- **Suggested area reductions not applied.** Removing the first/last
  pointers from the header by storing cell addresses in the queues and
  keeping a per-cell "last" bit has been proposed. These reductions are not
  applied here.
