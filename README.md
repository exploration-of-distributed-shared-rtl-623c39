# Distributed shared memory on a network-on-chip multiprocessor

This design is a multiprocessor system-on-chip. Its shared data are not
cached. They live in several on-chip memory modules spread over a mesh
network. A hardware memory management unit (the HwMMU) decides which module
holds each page, and it can move or copy pages between modules at run time.
Processing elements (PEs) address shared data through virtual pages. A small
TLB in each PE translates those pages to physical ones. Because of that
translation, the HwMMU can migrate a page, duplicate it, or compact the
pages of several half-empty modules into one and put the emptied modules to
sleep. None of this needs the software to know where the data are.

The configuration built by default:

| item | value |
|---|---|
| processing elements | 8 (cores outside the RTL; one request port each) |
| shared memory modules | 3 (`N_SM`, 1 to 3 supported) |
| shared space | 512 KB = 128 pages of 4 KB, split 43 / 43 / 42 pages |
| SD-TLB | 8 entries per PE, fully associative, LRU |
| network | 4x4 mesh, 5-port wormhole routers, 1-byte flits |
| nodes | 8 PE + 3 SM + HwMMU + L2 + main memory + interrupt controller = 15 |
| clock | one clock for everything |

## Node placement

A node id is `row*4 + col`. The default map (3 shared memories) is:

```
row 0:  HwMMU  PE     PE     MM
row 1:  PE     SM0    SM1    PE
row 2:  PE     SM2    PE     L2
row 3:  IC     PE     PE     (empty)
```

The maps for one and two shared memories are in `dsm_pkg::node_role`.
A router exists only where a node exists. Packets are routed X first, then
Y. When the X neighbour is an empty position, Y is taken first instead. The
routing table of every router is computed at elaboration
(`dsm_pkg::route_port`).

## What happens on a shared access

The core hands a request to its **communication coprocessor**
(`comm_coproc`). The request is one of: load, store, MALLOC, FREE, COPY or
MOVE. Loads and stores work like this:

1. The upper bits of the shared virtual address (the virtual page) are
   looked up in the **SD-TLB** (`sd_tlb`).
2. On a hit, the physical page names a module and a local page. A read or
   write message goes straight to that module's controller, and the reply
   ends the request. Data are never cached.
3. On a miss, the coprocessor sends `OP_TLB_MISS` to the HwMMU. The HwMMU
   answers with the page-table entry, and the coprocessor fills the TLB and
   repeats the lookup. A page that is not allocated ends the request with
   `err`.

MALLOC, FREE, COPY and MOVE are forwarded to the HwMMU unchanged. The core
gets back the HwMMU's result: a virtual address, or all ones on failure.

Each coprocessor has one request outstanding at a time.

## The HwMMU

`hwmmu` holds two tables:

- **Shared page table.** One entry per virtual page: valid, physical page
  `{module, local page}`, and an "end of block" bit so that FREE knows how
  far a block extends.
- **Memory state table.** For each module: active or asleep, the number of
  pages in use, and a bitmap of its used local pages.

Commands arrive through a queue with one slot per PE and are served one at a
time:

- **MALLOC(MEM, size)** takes `ceil(size/4096)` pages, all in one module. The
  pages get consecutive virtual numbers, chosen first-fit. `MEM = -1` means
  "HwMMU decides": the next module in round-robin order that has room.
  A sleeping module is sent a wake message before pages are allocated in it.
- **FREE(address)** releases the block that starts at `address`. A module
  whose last page is released is sent a sleep message.
- **COPY(MEM, address, n)** allocates `n` pages in `MEM`, copies the data,
  and returns the virtual address of the new copy.
- **MOVE(MEM, address, n)** keeps the virtual address and changes where the
  data are. This is the delicate part, described next.

### Moving a page safely while PEs keep running

While a page is being copied, a PE may still hold the old translation in its
TLB. It could then read stale data or write into the old copy. For every page
of a MOVE the HwMMU therefore does the following:

1. Allocate the destination page (waking the module if needed).
2. Broadcast `OP_TLB_INV(vpn)` to all eight PEs. Each coprocessor drops the
   entry at once. It sends `OP_INV_ACK` only when it has no load or store in
   flight. An access that was already travelling with the old translation
   therefore completes before the copy starts.
3. Wait for all eight acknowledgements.
4. Copy the 1024 words: read from the source module, write to the
   destination, wait for the write acknowledgement.
5. Point the page table at the new page. Release the old page, and put its
   module to sleep if it is now empty.

A PE that touches the page during the move misses in its TLB. Its miss joins
the HwMMU command queue behind the MOVE, so it is answered only after the
move has finished. It then gets the new translation. PEs that do not touch
the moving pages carry on at full speed.

Compaction is a MOVE of a block into a module that is already in use. The
source module empties and is put to sleep. The end-to-end test shows this
happening.

## Network

- **Network interface** (`network_interface`). Turns a message into a packet
  of byte flits and back. The packet is: destination node (head flit),
  source node, opcode, then 0 to 3 words of 32 bits, most significant byte
  first. The tail bit marks the last byte. `dsm_pkg::op_words` gives the
  number of words for each opcode. The receive side holds a complete message
  until the IP takes it, and back-pressures the router meanwhile.
- **Router** (`noc_router`). Three stages: an input queue, then route
  lookup, round-robin arbitration and the crossbar, then an output queue.
  Switching is wormhole: an output stays with one input from the head flit to
  the tail flit. Links use valid/ready. Queue depths are parameters
  (`IN_DEPTH`, `OUT_DEPTH`, both 2).
- **Mesh** (`noc_mesh`). Instantiates the routers and links of the map above.

## Memory modules

`sm_controller` serves read and write messages with its `sm_bank`. The bank
is a 32-bit-wide RAM with a one-cycle read. A reply leaves two cycles after
the request is accepted. A module starts asleep after reset. While asleep it
answers every access with `OP_SM_ERR`, which the coprocessor turns into
`err`.

## Top-level interface (`mpsoc_top`)

| port | meaning |
|---|---|
| `cpu_req[8]`, `cpu_req_valid`, `cpu_req_ready` | core requests (`cpu_req_t`: op, mem, addr, data) |
| `cpu_rsp[8]`, `cpu_rsp_valid` | one-cycle result pulse (`err`, `data`) |
| `ext_tx_*[3]`, `ext_rx_*[3]` | message ports of the L2 (0), main memory controller (1) and interrupt controller (2) nodes |
| `sm_sleeping`, `sm_accesses` | per module: power state, accesses served |
| `mst_active`, `mst_count` | the HwMMU's memory state table |
| `tlb_hits`, `tlb_misses`, `tlb_invals` | per-PE SD-TLB counters |
| `mmu_busy_cycles`, `mmu_words_copied` | HwMMU activity |

Request fields per operation:

| op | fields used |
|---|---|
| LOAD | `addr` |
| STORE | `addr`, `data` |
| MALLOC | `mem`, `data` = size in bytes |
| FREE | `addr` |
| COPY, MOVE | `mem`, `addr`, `data` = page count |

Parameters: `N_SM` (3), `TOTAL_PAGES` (128), `PAGE_BYTES` (4096),
`IN_DEPTH`/`OUT_DEPTH` (2).

## Measured timing

Measured in `tb_mpsoc_full` at the default size. Cycles run from the core's
request to its result.

| primitive | this RTL | reference figure (one-hop, 200 MHz PE, 400 MHz NoC) |
|---|---|---|
| MALLOC | 45 | 61 |
| FREE | 57 | 58 |
| COPY, 1 page | 84 038 | 66 + 54 886 |
| MOVE, 2 pages | 168 245 (84 122 per page) | 69 + 54 886 per page |

Each copied word costs two round trips across the byte-wide network, about
82 cycles. Some of the gap comes from the single clock: the reference runs
the network at twice the PE clock. The rest comes from the one-word-at-a-time
copy.

## Departures and limits

- **One clock.** The network is not clocked faster than the IPs, and the
  network interfaces use valid/ready rather than an asynchronous protocol.
- **No virtual channels.** There is one channel per link.
- **Own message format and opcodes.** See `dsm_pkg`.
- **Serial copy.** Pages are copied one word at a time, with one read
  outstanding. A pipelined copy would come closer to the reference per-page
  cost.
- **One module per block.** All pages of one MALLOC, COPY or MOVE go to a
  single module.
- **FREE does not invalidate TLBs.** A PE that kept a stale translation to a
  freed page either reaches a page that has been reused, or gets `err` if the
  module is asleep.
- **MOVE blocks its caller.** The PE that issues a MOVE gets its reply only
  when the move is done. Other PEs are not held up.
- **Not built:** the processor cores, their L1 caches and private TLB, the
  L2 cache, the main memory controller and the interrupt controller. The
  network nodes of the last three exist, and their message ports are top
  ports.
- **Only the mesh.** Ring and spidergon topologies are not built, and neither
  are 4 or 5 memory modules.
- **Run-time policies are software.** Migration points, replication and
  compaction decisions run on the cores; the hardware provides the
  primitives they use.

## Files

- `rtl/dsm_pkg.sv`: types, opcodes, node maps, routing function
- `rtl/rr_arbiter.sv`, `rtl/flit_fifo.sv`, `rtl/noc_router.sv`,
  `rtl/noc_mesh.sv`: network
- `rtl/network_interface.sv`: packetisation
- `rtl/sm_bank.sv`, `rtl/sm_controller.sv`: shared memory module
- `rtl/sd_tlb.sv`, `rtl/comm_coproc.sv`: PE side
- `rtl/hwmmu.sv`: the HwMMU
- `rtl/mpsoc_top.sv`: the system
- `tb/tb_<block>.sv`: one self-checking testbench per block
- `tb/tb_mpsoc_top.sv`: end-to-end test with 12 pages of 64 bytes. It covers
  round-robin placement, parallel stores and loads from all PEs, COPY, a MOVE
  with concurrent loads, compaction and sleep, a stale access to a sleeping
  module, and traffic between the external ports. It counts each mechanism.
- `tb/tb_mpsoc_full.sv`: the same primitives at the default size, 4 KB pages
- `tb/tb_mpsoc_matrix.sv` with `tb/matrix_runner.sv`: parallel 16x16
  matrix multiplication on eight PEs, run side by side on systems with one,
  two and three memory modules. The data are placed by the HwMMU with
  `MEM = -1`. The compute phase takes 83 782, 49 545 and 49 997 cycles: with
  one module, all eight PEs queue at that module.
- `tb/tb_mpsoc_bfs.sv` with `tb/bfs_runner.sv`: level-synchronous parallel
  breadth-first search over a 64-vertex graph. The queue and the level
  array are in shared memory. Each PE takes a fixed share of the queue, so
  no atomic fetch-and-increment is needed. It runs on one and three
  modules: 12 532 and 10 255 cycles.

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/dsm_pkg.sv $(ls rtl/*.sv | grep -v dsm_pkg) tb/tb_mpsoc_top.sv \
  --top-module tb_mpsoc_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. For `tb_mpsoc_matrix` and
`tb_mpsoc_bfs`, also add `tb/matrix_runner.sv` or `tb/bfs_runner.sv` to the
file list. `tb_mpsoc_full` takes under
a minute.
