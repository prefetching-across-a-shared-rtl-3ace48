# Stream prefetching at the root of a shared memory tree

In a network-on-chip with many CPU tiles and one external memory, every cache
miss crosses several levels of interconnect before it reaches DRAM. This
design takes advantage of the fact that, in a Blueshell-style system, all
memory traffic converges on a single point. Each tile's cache has its own path
to memory through a binary tree of 2-to-1 multiplexers (the *Bluetree*). That
path is separate from the mesh that carries CPU-to-CPU messages (the
*Bluetiles* NoC). A **prefetch unit (PU)** sits at the root of the tree. It
sees every miss of every CPU, detects sequential streams per CPU, and reads
lines ahead of them. It also merges a CPU's demand miss with a prefetch of
the same line that is already under way.

```
 tile 0 ... tile 15            (CPU + cache; outside this RTL)
   |  \        |  \
   |   \_______|___\______  4x4 Bluetiles mesh (bluetiles_mesh)
   |           |             CPU-to-CPU messages, X-Y routing
   |           |
  bt_mux ... bt_mux          level 3 \
      bt_mux ...             level 2  |  Bluetree (bt_tree), 2 cycles
         bt_mux  bt_mux      level 1  |  per level each way
            bt_mux           level 0 /
              |
        prefetch_unit        2 cycles each way
              |
        bt_cdc_bridge        tree clock -> memory clock
              |
        memory controller    (outside this RTL)
```

`blueshell_top` holds all of the above. The CPU tiles and the memory
controller connect at its ports.

## The prefetch unit

### State

| Structure | Size | Contents |
|---|---|---|
| Stream table (`pu_stream_buffers`) | 8 entries per CPU | last line address of a stream and a valid bit; each CPU's entries are replaced in circular order |
| Prefetch buffer (`pu_prefetch_buffer`) | 32 slots, circular | `{cpu, line}` and a state: QUEUED (waiting for the memory port), ISSUED (at memory), RECENT (returned, on its way to the CPU) or INVALID |
| Squash buffer (`pu_squash_buffer`) | 32 slots, circular | `{cpu, line}` of demand reads that were merged with a pending prefetch |

All lookups compare against every entry in one cycle. The unit handles one
request from the tree and one response from memory per cycle.

### Rules

`D` is the prefetch distance (lookahead), set to 1, 2 or 4 by
`cfg_pf_distance`.

**Demand read of line `a` from CPU `c`** (a cache miss):

1. If `{c, a}` is RECENT in the prefetch buffer, the prefetch is already
   travelling down the tree to that CPU and will satisfy the miss. The read
   is dropped.
2. If `{c, a}` is QUEUED or ISSUED, the read is *squashed*: `{c, a}` goes
   into the squash buffer and nothing is sent to memory.
3. Otherwise the read goes to memory. The unit also looks in CPU `c`'s
   stream table for `a − D`:
   - **Found:** a prefetch of `a + D` enters the prefetch buffer and the
     stream entry becomes `a + D`.
   - **Not found:** a new stream holding `a` replaces one of the CPU's eight
     entries.

**Hit notification for line `a` from CPU `c`.** The cache sends this when it
hits a line it received as a prefetch. If a stream of `c` ends at `a`, the
unit prefetches `a + D` and the stream becomes `a + D`. The next prefetch in
a stream is therefore started either by a miss or by the use of the previous
prefetch.

**Write to line `a`.** The write goes to memory. Any RECENT slot for `a` is
freed, so a later miss on `a` cannot be dropped against stale data.

**Response from memory:**
- A response to a demand read goes down as a *standard read*.
- A response to a prefetch turns its slot RECENT. If a squashed demand for
  `{c, a}` is waiting, the response goes down as a standard read and the
  squash entry is freed. Otherwise it goes down as a *prefetch*, which the
  cache installs with a "prefetched" mark.

**Memory port priority.** A demand read or write from the request path
always takes the port first. Queued prefetches leave in the order they
arrived, in cycles that have no demand. When memory is heavily loaded,
prefetches therefore wait in the buffer, and the demand that follows them
is squashed onto them. This is how prefetching loses its benefit as load
rises.

### Why the stream entry stores `a + D`

The entry stores the address it last prefetched, not the one last
demanded. A later hit notification on exactly that line then finds the
stream. The miss rule looks for `a − D` for the same reason.

With `D = 4` and a sequential stream, the first four misses (0, 1, 2, 3)
open four streams. Miss 4 finds 0 and prefetches 8, miss 5 finds 1 and
prefetches 9, and so on. After that, each hit notification on line `n`
prefetches `n + 4`. So with `D > 1`, D interleaved streams of stride D
cover one sequential access pattern. That is why the table has several
entries per CPU.

With `D = 1`, a prefetch that is still pending when the CPU reaches its
line gets squashed. The line then arrives as a standard read, no hit
notification follows, and the next line misses again. Larger distances
avoid this under load.

### Interface and timing

- **Links.** Every link is valid/ready and carries one whole packet
  (`bt_pkg::bt_pkt_t`, 77 bits):
  - type (`BT_READ`, `BT_WRITE`, `BT_HIT`, `BT_RD_RESP`, `BT_PF_RESP`);
  - CPU number (4 bits);
  - prefetch flag;
  - 5-bit tag;
  - 32-bit line address;
  - one 32-bit data word.
- **Tag.** A prefetch read carries its prefetch buffer slot in the tag. The
  memory side must return cpu, pf, tag and addr unchanged.
- **Crossing time.** Each direction has an input buffer and an output
  buffer, so a packet crosses the unit in 2 cycles.
- **Bypass.** `cfg_pf_enable = 0` bypasses the unit's function:
  - reads and writes pass straight through;
  - hit notifications are dropped;
  - no prefetch is started.

  This is the "conventional system" the prefetching is measured against.
  It keeps the same latency.
- **Monitoring outputs:**
  - `ev`: one-cycle strobes for every rule above;
  - `mem_outstanding`: reads outstanding at memory (memory load);
  - `pf_queued`: prefetches waiting for the memory port;
  - `sq_count`: squash buffer occupancy.

## The shared memory tree

`bt_mux` is one tree node:

- **Upwards**, it merges two child request links round-robin.
- **Downwards**, it sends each response to child `cpu[SEL_BIT]`.
- **Timing.** Each direction has a 2-entry input FIFO and a 2-entry output
  FIFO, so crossing a node costs 2 cycles and a full link carries one packet
  per cycle.

`bt_tree` builds `log2(NLEAF)` levels of nodes, numbered as a heap. Leaf `i`
must send requests with CPU number `i`, and it receives all responses
addressed to `i`. With 16 tiles a request needs 8 cycles to reach the root.
Adding the PU, the tree-plus-PU round trip is 20 cycles.

## Clock crossing to memory

`bt_cdc_bridge` holds two dual-clock FIFOs (`bt_async_fifo`). Their pointers
are Gray-coded and pass through two-flop synchronisers. The reference system
places a tree multiplexer here as well. It runs the tree at 50 MHz and
memory at 100 MHz, and quotes about 15 tree cycles for this crossing. The
multiplexer's second input is not described, so this bridge has a single
tree-side port. Its own delay is only about 3 destination cycles each way.

## The Bluetiles mesh

`bluetiles_router` has five 32-bit ports: local, north, east, south and
west.

- **Routing.** A message is a header word followed by payload words. The
  router reads the destination from the header and routes X first, then Y.
- **Forwarding.** The whole message follows its header through the chosen
  output before that output serves anyone else (wormhole). Waiting headers
  are served round-robin.
- **Header layout:**
  - `[3:0]` destination x;
  - `[7:4]` destination y;
  - `[15:8]` number of payload words;
  - bits 31:16 are free.
- **Timing.** One input buffer per port, so each router adds one cycle.

`bluetiles_mesh` connects NX × NY routers. Tile `t = y·NX + x` sits at
router `(x, y)`, and north is towards smaller y. Mesh traffic and memory
traffic never share a link.

## Simulating

Every file has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert --top-module tb_blueshell_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/bt_pkg.sv tb/tb_blueshell_top.sv
./obj_dir/Vtb_blueshell_top
```

Replace the top module and file to run another testbench:

| Testbench | What it checks |
|---|---|
| `tb_bt_mux` | 2-cycle crossing both ways, round-robin alternation, per-child order under back-pressure, response steering |
| `tb_bt_tree` | 8-cycle leaf-to-root and root-to-leaf, all 16 leaves at once get exactly their own responses |
| `tb_pu_stream_buffers`, `tb_pu_prefetch_buffer`, `tb_pu_squash_buffer` | directed cases plus thousands of random operations against a reference model |
| `tb_prefetch_unit` | each rule above in turn, including order at the memory port, distances 2 and 4, write invalidation and bypass |
| `tb_bt_cdc_bridge` | 200 packets each way between 50 and 100 MHz clocks with random stalls |
| `tb_bluetiles_router`, `tb_bluetiles_mesh` | X-Y output choice, unbroken messages, per-source order, 7 cycles corner to corner |
| `tb_blueshell_top` | the whole system at its default size (see below) |
| `tb_workload_sweep` | the whole system at its default size over a sweep of inter-access delays (see below) |

`tb_blueshell_top` uses two behavioural models from `tb/`. `cpu_tile_model`
stands in for a CPU tile: a sequential-read traffic generator with a fixed
delay between accesses, behind a tag-only 256-line cache that sends hit
notifications. Tiles 3, 7, 11 and 15 also write every seventh line.
`ddr_model` stands in for memory: one transaction at a time, 10 memory
cycles each. Every read's data is checked. The test fails if any PU
mechanism never fired: squash, recent-drop, hit notification, drop on a
full buffer, write invalidation, and both response kinds. A typical run
(48 accesses per tile) reports the following normalised execution time
(cycles without prefetching ÷ cycles with it):

| Tiles | Delay | D = 1 | D = 2 | D = 4 |
|---|---|---|---|---|
| 16 | 300 | 1.08 | | |
| 8 | 150 | 1.15 | | |
| 4 | 30 | 1.42 | 1.61 | 1.50 |
| 16 | 0 (memory saturated) | | | 0.97 |

The trends are the expected ones:
- The gain grows as fewer tiles share the memory.
- A distance above 1 helps when accesses come quickly.
- Prefetching costs a little when memory is saturated.

The absolute numbers depend on the memory model and on the short run.

`tb_workload_sweep` runs the same workloads over a range of loads. The
delay goes from 300 cycles down to 0 in steps of 60, with 32 accesses per
tile. Each point runs once with the unit bypassed and once with prefetching
on. The test prints two numbers per point:
- **memory load**: the share of cycles in the bypassed run with a read
  outstanding at memory;
- **normalised execution time**, as above.

Selected points from one run:

| Tiles, D | Delay 300 | Delay 120 | Delay 60 | Delay 0 |
|---|---|---|---|---|
| 16, D = 1 | 1.09 (load 0.30) | 1.21 (0.65) | 0.98 (0.97) | 1.00 (0.99) |
| 8, D = 1 | 1.09 (0.16) | 1.21 (0.34) | 1.41 (0.56) | 0.97 (0.99) |
| 4, D = 1 | 1.09 (0.08) | 1.22 (0.18) | 1.43 (0.31) | 1.23 (0.89) |
| 4, D = 4 | 1.07 (0.08) | 1.17 (0.18) | 1.32 (0.31) | 1.17 (0.89) |

The gain rises with load until memory saturates, and then it disappears.

## Departures and own choices

The packet format, the valid/ready handshakes, buffer depths, arbitration,
reset (asynchronous, active low) and the mesh header layout are this
design's own. The following behaviours are also choices not fixed by the
prefetching scheme:

- Matches in the prefetch and squash buffers use `{cpu, line}`, so a merged
  demand is always answered to the CPU that asked.
- A prefetch for a line that is already in the prefetch buffer is not
  repeated.
- A full squash buffer sends the demand to memory.
- If the prefetch buffer slot under the pointer is still pending, the new
  prefetch is dropped and the stream keeps the demanded address.
- If a prefetch completes in the same cycle as a demand for its line, the
  demand is dropped as if the slot were already RECENT.
- The clock crossing is faster than the reference system's crossing
  multiplexer (see above), so the memory round trip is shorter than there.
- The CPU tiles (soft processors with custom cache control) and the DDR3
  controller are not part of the RTL. Their links are top-level ports.
