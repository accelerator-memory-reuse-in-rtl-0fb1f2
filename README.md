# Accelerator memory reuse: accelerator memories as a shared L3 cache

Accelerators built into a chip next to general-purpose cores are mostly
memory, and much of the time most of them sit idle. This design lets that
memory earn its area while its accelerator is off: every accelerator tile
carries a small *cache manager*, and when the software switches the tile to
cache mode, its memory becomes one slice of a last-level (L3) cache shared by
the CPUs. The slices are nodes on a network-on-chip (NoC), so together they
form a non-uniform cache (NUCA): a line lives in exactly one slice, chosen by
its address.

The RTL models the system the design was evaluated on: a 3x2 mesh NoC with a
CPU tile, a DRAM controller and four tiles of an MPEG encoder (ReO, ME-fwd,
ME-bwd, Enc+Dec), each with 512 KB of memory. With all four tiles in cache
mode the CPUs see a 2 MB, 16-way L3 behind their 128 KB L2. The shared L2
is included as an option (`HAS_L2`); the CPU cores with their L1 caches, the
DRAM controller and the encoder logic itself are not part of the RTL, and
the top level has ports where they attach.

## System map

```
        x=0                 x=1                 x=2
 y=0    CPU tile port       acc tile 0 (ReO)    acc tile 1 (ME-fwd)
 y=1    DRAM controller     acc tile 2 (ME-bwd) acc tile 3 (Enc+Dec)
```

Each node has a `noc_router`; neighbours are linked north/east/south/west and
the node itself sits on the local port. `amr_top` builds the mesh, places
the tiles, and exposes:

| port group | who drives it | what it carries |
|---|---|---|
| `cpu_req_*`, `cpu_rsp_*` | the CPUs' L1s (`HAS_L2 = 1`) | 32-byte line reads and write-through 32-bit stores with byte enables, into the built-in L2 |
| `l2_req_*`, `l2_rsp_*` | an external L2 (`HAS_L2 = 0`) | 32-byte line reads (L2 misses) and line writes (L2 write-backs); answer carries data or a NAK |
| `cfg_req_*`, `cfg_rsp_*` | CPU software | read/write of a tile's configuration registers |
| `dram_rx_*`, `dram_tx_*` | DRAM controller | the DRAM node's router local port: memory requests out, answers in |
| `acc_*[tile][bank]` | accelerator logic | direct access to the tile's memory while in accelerator mode |
| `mem_to_acc[k]`, `cache_ready[k]`, `dvfs_level[k]` | outputs | who owns tile k's memory, whether its slice is serving, its DVFS setting |

`tb/dram_model.sv` is a behavioural DRAM node (180-cycle latency) used by
the system testbenches.

## Tile modes and switching

A tile is always in one of two modes, held in its `CFG_MODE` register:

* **Accelerator mode** (reset state, `CFG_MODE = 0`). The memory belongs to
  the accelerator (`mem_to_acc = 1`). Cache requests that still arrive are
  answered with `PKT_CACHE_NAK`; the CPU port reports this as `l2_rsp_nak`.
* **Cache mode** (`CFG_MODE = 1`). The memory is a cache slice.

Entering cache mode: the CPU writes 1 to `CFG_MODE`. The memory is taken
from the accelerator at once. The control then invalidates every set, one
per cycle (1024 cycles at full size), because the memory holds accelerator
data and the tags hold nothing valid. After that `cache_ready` rises and
requests are served. A request that arrives during invalidation waits.

Leaving cache mode: the CPU writes 0. The slice is write-back, so the memory
cannot simply be handed back: the control finishes the request in hand,
then walks every set, writes each dirty line back to DRAM (waiting for each
write acknowledgement), and invalidates the set. Only when the walk ends does
`mem_to_acc` rise again. While `mem_to_acc` is low, the accelerator
logic has no memory and can be clock- or power-gated; most of a tile's
power saving in cache mode comes from this. Software should poll `CFG_STATUS` (bit 0: slice ready, bit 1:
memory still held by the cache) before starting the
accelerator.

What the slice does *not* do: there is no back-invalidation of the CPUs' L2
when a line is evicted or flushed, so the L3 is not inclusive. An L2 that
needs inclusion must get it elsewhere.

## Cache manager

`cache_manager` = `cm_tag_array` + `cm_control` + `cm_adapter`. Only the
adapter depends on the accelerator; the tag array and control are identical
in every tile and would be the same for a dedicated cache slice of equal
size.

### Geometry

| quantity | value | how it follows |
|---|---|---|
| line | 32 B | system line size |
| memory per tile | 512 KB = 16384 lines | `TILE_MEM_BYTES` |
| ways | 16 | `WAYS` |
| sets | 1024 | 16384 / 16 |
| address split | tag [31:15] (17 bits), index [14:5], offset [4:0] | 5 + 10 + 17 = 32 |
| slice select | address [16:15] | lowest two tag bits, for four slices |

A line is stored at *slot* `{set, way}` of the tile memory, so the cache
uses exactly the memory the accelerator had, with no extra data storage.

### Tag array

One entry per way per set: valid, dirty, 17-bit tag and a 4-bit LRU age.
A lookup (`rd`) reads a whole set in one cycle and reports hit/way or the
victim way (an invalid way first, otherwise the oldest). An update (`upd`)
writes one way and makes it most recently used: ways younger than it age by
one, it becomes 0. `clr` invalidates a set. The ages of a set are always a
permutation of 0..15, which gives true LRU.

### Control

A request is a whole-line read or write from one requester. The control
accepts one at a time:

1. **Tag check.** Set read, hit or victim found.
2. **Hit read:** line read through the adapter, way made MRU.
   **Hit write:** line written, way marked dirty and MRU.
3. **Miss:** if the victim is dirty its line is read and sent to DRAM
   (`PKT_MEM_WR`), and the control waits for the acknowledgement. A read
   miss then fetches the line from DRAM (`PKT_MEM_RD`), stores it and
   returns it. A write miss stores the new line as dirty without fetching
   anything, since a write-back always covers the whole line.
4. **Answer.** The answer is held until at least `HIT_LATENCY` (15) cycles
   have passed since the request was accepted, so every slice behaves like a
   15-cycle cache whatever its memory width. Misses add the DRAM round trips.

An assertion checks that no answer leaves before `HIT_LATENCY` cycles.

### Adapter

The control speaks in line slots; the adapter turns a slot into memory
accesses, which differ per accelerator:

* **Words narrower than a line** (e.g. 4 B): a line takes
  `32 / MEM_W_BYTES` sequential accesses (8 for 4-byte words), one per cycle.
* **Words wider than a line** (the MPEG tiles: 64 B): two lines share a
  word. Slot `s` is in word `s/2`, half `s%2`. A write uses byte enables on
  that half; a read selects it. One access per line.
* **Several banks** (ReO has two 64-byte blocks): consecutive words
  alternate between banks, so word `w` is row `w/2` of bank `w%2`. The
  adapter also multiplexes the banks.

The memory model (`acc_mem`) has a one-cycle read latency and byte enables.
The tile (`acc_tile`) multiplexes each bank between the accelerator port and
the adapter according to the mode.

## Network interface

Each tile's `network_interface` offers the services common to all
accelerators:

* **Message queues**: an outbound queue (256-bit message plus destination)
  and an inbound queue (message plus sender).
* **Shared-memory unit** (`ni_shmem_unit`, only if `HAS_SHMEM = 1`): the
  accelerator can read or write one 32-byte line of DRAM at a time. A tile
  built without it gets deeper message queues (`MSGQ_DEPTH_NOSH = 8`
  instead of 4).
* **Configuration registers** (`ni_config_regs`): `CFG_MODE` (0), `CFG_DVFS`
  (1) and `CFG_STATUS` (2, read-only). A `PKT_CFG_RD`/`PKT_CFG_WR` is
  answered with `PKT_CFG_RSP` carrying the value *before* the access. The
  DVFS register is only stored and driven out on `dvfs_level`.
* **Cache forwarding**: cache requests go to the cache manager, its answers
  back to the requester, and its fills and write-backs to the DRAM node.

Every arriving packet is sorted into a queue for its service, so a full
message queue cannot block a cache answer. Outgoing packets from the five
sources go out in round-robin order, one per cycle.

### Packet format

Every packet is a single flit (`noc_pkt_t` in `amr_pkg`):

| field | width | meaning |
|---|---|---|
| `ptype` | 4 | `PKT_CACHE_RD/WR/RSP/NAK`, `PKT_MEM_RD/WR/RSP`, `PKT_CFG_WR/RD/RSP`, `PKT_MSG` |
| `src`, `dst` | 3 each | node `{y, x}` |
| `id` | 1 | on memory packets: cache manager (0) or shared-memory unit (1) |
| `addr` | 32 | line address, or register number |
| `data` | 256 | one line, a message, or a register value |

A line travels in one flit, which makes the links wide (about 300 bits).
This is a simplification; a narrower, multi-flit link would need only a
change to the router and NI.

## NoC router

`noc_router` has five ports, each with a 2-entry input FIFO. Routing is XY
(first along x, then y), which cannot deadlock on a mesh. Each output
arbitrates round-robin among inputs that want it. A packet moves one hop per
cycle when the next FIFO has room. The measured CPU-to-slice round trip on a
hit is 21–25 cycles: 15 in the slice, the rest in the network and the CPU
port.

## Shared L2 (CPU tile)

With `HAS_L2 = 1`, `amr_top` contains `l2_cache`, the CPU tile's shared L2:
128 KB, 4 ways, 1024 sets, LRU, write-back and write-allocate. It reuses
the slice's tag array and a 32-byte-wide data array. Since the L1s are
write-through, the L2 receives line reads and single-word stores:

* cycle 0: the request is accepted and the set is looked up;
* cycle 1: hit or miss is known; on a hit the line is read, or the word is
  written with byte enables;
* cycle 2: a hit is answered.

On a miss, a dirty victim is written back first (whole line). Then the
line is read from below, merged with the stored word if the request was a
store, and written into the array. After reset the L2 spends one cycle per
set clearing its tags before it accepts requests.

Below the L2, a line may belong to a tile that is not a slice at the
moment. In that case the slice refuses the request, and the CPU port sends
it again to the DRAM controller (`NAK_TO_DRAM`, set by `HAS_L2`). So the
same hardware runs with no L3, part of an L3 or the full L3. This cannot
read stale data. A tile that leaves cache mode holds every request until
its flush has finished, and only then starts refusing.

## CPU port and interleaving

`cpu_llc_port` sends each L2 request to the slice that owns the line:
slice = address bits `[SLICE_LSB +: log2(NUM_SLICES)]` (bits [16:15] for
four slices), i.e. the lowest tag bits, directly above the set index. Each
slice thus receives every set index, and lines spread evenly.

`amr_top` parameter `L3_SLICES` selects the configuration:

* `4` (default): all four tiles are slices, 2 MB of L3.
* `2`: tiles 0 and 1, 1 MB.
* `1`: tile 0 alone, 512 KB of L3.

Only the tiles in the list should be put in cache mode; the others stay
accelerators. The port handles one transaction at a time; its ready signals
are low until the answer returns. Configuration accesses go first when both
are waiting.

## Parameters

| parameter | default | where |
|---|---|---|
| `TILE_MEM_BYTES` | 524288 | `amr_top`, memory per tile |
| `MEM_W_BYTES` | 64 | `amr_top`, memory word width |
| `REO_BANKS` | 2 | `amr_top`, banks on tile 0 |
| `WAYS` | 16 | `amr_top`, slice associativity |
| `HIT_LATENCY` | 15 | `amr_top`, minimum cycles per slice request |
| `L3_SLICES` | 4 | `amr_top`, slices the L3 is spread over |
| `HAS_L2` | 0 | `amr_top`, include the CPU tile's L2 (1) or leave it outside (0) |
| `L2_BYTES`, `L2_WAYS` | 131072, 4 | `amr_top` / `l2_cache` |
| `HAS_SHMEM`, `MSGQ_DEPTH`, `MSGQ_DEPTH_NOSH` | 1, 4, 8 | `network_interface` |
| `FIFO_DEPTH` | 2 | `noc_router` |

Sets follow as `TILE_MEM_BYTES / 32 / WAYS` and must be a power of two. The
tag stays 17 bits at the default sizes.

## Where this RTL departs from the design it follows

* **Mechanism filled in.** The original describes what the cache manager and
  NI do, not how. State machines, queue sizes, packet format, register map,
  the NAK in accelerator mode, no-fill write allocation, the bank
  interleaving on ReO and the one-transaction CPU port are this design's.
* **Network latency.** The original assumes a 7-cycle average NoC access.
  Here the NoC has one cycle per hop plus queueing, and is not tuned to a
  target. On an idle network the NoC and CPU port add 6–10 cycles to a
  15-cycle slice hit, 8 on average over the four slices.
* **Inclusion.** The original's L3 is inclusive of the L2. Here a slice
  drops a line without invalidating the L2's copy. Correctness does not
  depend on inclusion: a later write-back of that line from the L2 simply
  allocates it again, and after a flush it goes to DRAM. Back-invalidation
  would need a message from slice to CPU tile, plus handling for a dirty
  L2 copy while the CPU port is busy.
* **L2 reuse.** The original also evaluated the accelerator memories as
  remote L2 slices beside the local 128 KB L2 (512 KB and 1.5 MB extra),
  and found it slower than using them as L3. Here the memories only serve
  as L3. The L2 level is not interleaved over local and remote slices.
* **L2 placement.** `HAS_L2` defaults to 0, so the default top leaves the L2
  outside. This keeps the L3 ports visible to an existing CPU tile.
* **Not included:** the CPU cores and their L1 caches, the DRAM controller, the
  encoder logic, and any power gating of the accelerator logic or use of the
  DVFS value.

## Verification

Every RTL block has a self-checking testbench in `tb/` (the FIFO and the
slice control are tested inside the NI and cache-manager benches) that ends with
`TB_RESULT checks=<n> failures=<n>`:

| testbench | covers |
|---|---|
| `tb_acc_mem` | memory read latency, byte enables |
| `tb_cm_adapter` | 64-byte words, two banks, 4-byte words (8 beats) |
| `tb_cm_tag_array` | lookup, LRU order, victim choice, clear |
| `tb_cache_manager` | hits, misses, dirty write-back, NAK, flush, 15-cycle minimum |
| `tb_noc_router` | XY routes from every port, round-robin fairness, back-pressure |
| `tb_ni_config_regs`, `tb_network_interface` | register access, packet sorting, queues, shared memory |
| `tb_cpu_llc_port` | slice selection, NAK, configuration path, retry of a refused request at DRAM |
| `tb_acc_tile` | mode switching, accelerator access, cache traffic |
| `tb_l2_cache` | L2 at 2 KB: hits in 2 cycles, write-allocate, write-back only on eviction, LRU order, random traffic against a byte-exact reference |
| `tb_amr_top` | whole system at 16 KB tiles: switch all tiles to cache mode, random traffic against a reference memory, flush, back to accelerators; counts hits, misses, write-backs, NAKs |
| `tb_amr_top_full` | whole system at default (512 KB) sizes |
| `tb_amr_l3_configs` | a working set run three times on a 4-slice and a 1-slice L3 at 8 KB tiles: the 4-slice L3 misses only on the first pass (mean latency 69 cycles), the 1-slice L3 misses on every pass (mean 195) |
| `tb_amr_l2_full` | whole system at default sizes with the L2 inside (128 KB L2, four 512 KB slices), on a 256 KB working set. Pass 1 reads each line from DRAM once (8192 reads). Pass 2 reads no DRAM: what the L2 lost, the L3 holds. Pass 3 re-reads the last 64 KB, and all 2048 reads hit the L2 in 2 cycles. |
| `tb_amr_l2_configs` | whole system with the L2 inside (2 KB L2, 8 KB tiles, both scaled by 64) running 24 KB of L1 traffic three times. With no L3, every pass reads 768 lines from DRAM (mean 197 cycles). With a 1-slice L3 it does the same (199). With a 4-slice L3 only the first pass reads DRAM (mean 75). Then the four tiles are handed back to their accelerators. A fourth pass reads every line from DRAM again with its latest data, which shows that the flushes and the retried L2 write-backs lost nothing. |

The system testbenches check each read against a reference model of memory
contents, so data lost in a flush or write-back shows as a failure.

## Simulating

With Verilator 5 (any testbench, named after its file):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/amr_pkg.sv tb/tb_amr_top.sv --top-module tb_amr_top
./obj_dir/Vtb_amr_top
```

The full-size testbenches (`tb_amr_top_full`, `tb_amr_l2_full`) take
10–20 seconds each. To change the system, edit
the parameters of `amr_top` (see the table above) or override them in the
testbench instance; `tb_amr_top` shows a reduced-size build.
