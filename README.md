# Virtual local stores in an L1 data cache

Some programs run best with a software-managed local store: a scratchpad the
program fills and drains itself with DMA. Others run best with a cache that
does this by itself. A chip with a separate local store makes every program
pay for it. The store takes area the cache could have used, its contents must
be saved and restored on every context switch, and it needs its own address
space.

A *virtual local store* (VLS) builds the local store out of the cache. Part
of an ordinary set-associative L1 data cache (0 to 3 of its 4 ways) is set
aside for one thread's local store. The local store has its own range of
virtual addresses and its own pages of physical memory, which back it. Its
lines sit in the reserved ways at fixed, direct-mapped positions, and regular
cache misses are not allowed to evict them. So inside its partition the
local store behaves like a scratchpad: accesses always hit, at cache
latency, and data moves in and out only when software moves it.

Because every local-store line is also a cache line with a physical tag,
nothing has to be done when the partition changes. If the partition shrinks
or the thread is switched out, its lines become ordinary victims. Dirty ones
are written back to their backing pages when something evicts them. When the
thread returns, the lines it touches are refilled from those pages on
demand. A program can resize or drop its local store between two routines
with a single register write, and the operating system saves four registers
instead of 24 KB.

This repository holds synthesizable SystemVerilog for:

- one core's VLS-enabled L1 data cache (`vls_l1`), with its DMA engine;
- a 16-core top (`vls_cmp`) in which threads can read and write each other's
  local stores over a separate core-to-core network.

Every block has a self-checking testbench.

## Configuration

| Item | Default | Where set |
|---|---|---|
| L1 data cache | 32 KB, 4 ways, 256 sets, 32-byte lines | `SETS` in `vls_l1`/`vls_cache_ctrl`; `WAYS`, `LINE_BYTES` in `vls_pkg` |
| Local store size | 0, 8, 16 or 24 KB (0-3 ways) | run time, `REG_WAYS` |
| Virtual / physical address | 64 / 40 bits, 4 KB pages | `vls_pkg` |
| Data word | 32 bits | `vls_pkg` |
| TLB | 16 entries, fully associative, software refilled | `TLB_ENTRIES` |
| Cores | 16 | `NCORES` in `vls_cmp` |

The cache geometry, the 0-24 KB local store in 8 KB steps, the 16 cores and
the single DMA engine per core come from the original proposal. The address
widths, the page size, the TLB and all interface details are this design's
choices.

## Finding a local-store access and its physical address

The local store is a 4 GiB segment of the virtual address space: every
address whose upper 32 bits are `0xFFFF_FFFE` (`VLS_SEG_TAG`). This check is
a single compare on the high address bits, so it can be done early. Each
core has four registers (`vls_regs`):

| Register | Meaning |
|---|---|
| `enabled` | the local store is mapped and its partition is reserved |
| `pbase` | physical page number where the local store's backing pages start |
| `pbound` | number of backing pages; an access at or beyond it faults |
| `ways` | partition size in ways (writes above 3 saturate at 3) |

For a local-store access, `vls_addr_map` does three things:

- It forms the physical address as `(pbase + page index within the segment)`
  concatenated with the page offset. The TLB is not looked up, so the local
  store never takes a TLB miss.
- It compares the page index with `pbound` (`>=`) and raises a fault if the
  access lies beyond the backing pages.
- It also raises a fault if the local store is disabled.

Any other access goes through the TLB (`vls_tlb`). A TLB miss also comes back
as a fault, because page walks are outside this design. A faulting access
never reaches the cache. It is answered with `fault` set one cycle after it
was accepted.

## Direct-mapped placement and way enables

A local-store line may live in only one place. Its set is given by the usual
index bits [12:5]. Its way is given by the two address bits just above the
index, bits [14:13]. Way *w* of the cache is therefore the local store's
bytes `w*8K .. w*8K+8K-1`. A 24 KB local store fills ways 0, 1 and 2 exactly,
and a 16 KB one fills ways 0 and 1.

This has three consequences:

- **Way enables.** On a local-store access only that one way's tag and data
  arrays are read (`vls_way_enable`), which saves energy. An assertion in
  `vls_cache_ctrl` checks that exactly one way is enabled.
- **Hits need no change.** A local-store hit is an ordinary tag match in
  that way.
- **Misses need no search.** A local-store miss needs no way prediction. It
  evicts whatever occupies the line's fixed position, then refills the line
  from the backing page.

A regular access reads and compares all four ways, including the partition.
This is how data that was cached before the partition was reserved, or lines
of an earlier owner, are still found.

The design assumes the local store's backing pages are not also mapped
through the TLB at the same time. Otherwise a line could be in two places at
once.

## Partition-aware replacement

`vls_repl` chooses victims for regular misses from the ways outside the
partition only: ways `part_ways .. 3`, where `part_ways` is `ways` when
enabled and 0 otherwise. Among those ways it takes the first invalid one,
otherwise the least-recently-used one (true LRU over 4 ways).

A local-store miss ignores this logic and uses its direct-mapped way. With a
24 KB local store, regular data therefore has a single 8 KB way.
`tb_vls_l1` checks that a full 24 KB local store survives a 64 KB stream of
regular misses without losing a line.

The original proposal only says that the cache otherwise keeps its usual
replacement policy. LRU is this design's choice.

## The cache controller

`vls_cache_ctrl` is a blocking, physically tagged, write-back,
write-allocate cache. Per way it has a tag array and a data array (`vls_sram`,
synchronous read). Valid, dirty and LRU state are flip-flops so that reset
clears them. It handles one access at a time:

- **Cycle 0 (IDLE):** accept the request and read the enabled ways.
- **Cycle 1 (LOOKUP):** compare tags. A hit is answered in this cycle, so a
  hit returns one cycle after acceptance. The next access can be accepted one
  cycle later. A store writes its bytes on the hit.
- **Miss:** the victim is written back if it is dirty (WB). The line is then
  read from memory (REFILL) and installed, merged with any store data
  (INSTALL).
- **Bypass (BYP\_\*):** DMA accesses marked `no_alloc` that miss go straight
  to memory without allocating a line.
- **No refill:** DMA writes marked `no_refill` skip the refill and install a
  zeroed line, which the transfer then overwrites in full.

The memory port is line-wide (256 bits) with valid/ready. Writes are posted,
and a read returns one line on `mem_resp_valid`.

## The DMA engine and its hints

Each core has a user-level DMA engine (`vls_dma`) that uses the cache's own
access path. It copies `count` 32-bit words between any two virtual
addresses:

| Mode | What it does |
|---|---|
| `DMA_UNIT` | contiguous copy on both sides |
| `DMA_STRIDE` | signed byte strides on both sides |
| `DMA_GATHER` | source address = `src + 4*index[i]`, with the 32-bit indices read from a list at `idx` |
| `DMA_SCATTER` | the same, applied to the destination |

It runs in parallel with the processor. `vls_req_arb` alternates between the
two when both want the cache. A processor `OP_FENCE` is accepted only once
the engine is idle, so it waits for all earlier transfers to finish.
`dma_error` reports a faulting access, which stops the transfer.

The engine marks its accesses with two hints. These keep the cache from doing
work a local store would never do:

- **`no_alloc`** is set on the memory side of a copy between memory and the
  local store: the source reads of a memory-to-local-store copy, and the
  destination writes of a local-store-to-memory copy. Those lines then do not
  take up cache space next to their local-store copy.
- **`no_refill`** is set on a local-store write whose whole 32-byte line the
  current transfer will overwrite. The engine works this out from the mode
  and the destination range: unit stride, gather, or a 4-byte destination
  stride, with the line lying wholly inside `[dst, dst + 4*count)`. A
  partial first or last line is refilled as usual.

The end-to-end test counts both hints. It checks, for example, that a copy of
64 words into an aligned local-store range causes 64 bypasses and 8 skipped
refills.

## Context switches

On a switch the operating system reads the four registers, clears `enabled`,
and loads the next thread's values. Nothing is flushed. The next thread's
misses evict the old local-store lines when they need the space, and dirty
ones go back to their backing pages. When the first thread returns, its
registers are restored. Each line it touches is then either still in place
(a hit) or is refilled from its backing page.

`tb_vls_l1` runs this sequence and checks each step:

- A local-store access while disabled faults.
- Dirty lines reach their backing pages.
- A second thread with a smaller local store gets its own `pbound` fault.
- The first thread's data is intact after it is restored.

## Reading another thread's local store

Each thread can also address every participating thread's local store. Each
has its own range: `VA[63:40] = 0xFFFFFD`, `VA[39:32]` = local-store number
*k*, `VA[31:0]` = offset. Each core keeps one register per data cache in the
system (`vls_remote_map`), holding a valid bit and the number of the local
store resident in that cache. The operating system keeps these consistent. In
`vls_cmp` a register write is broadcast to every core.

For an access in range *k* the registers are searched:

| Outcome | What happens |
|---|---|
| *k* resident in this core | the address is rewritten to the own segment, making it an ordinary local-store access |
| *k* resident in core *j* | the access, rewritten to core *j*'s own segment, leaves on `rvls_out` |
| *k* not resident | the access is treated as ordinary memory through the TLB, which must map range *k* to *k*'s backing pages |

Remote accesses travel over `vls_xnet`. This crossbar is separate from the
memory network, forwards in zero cycles, serves one access at a time per
target, and uses round robin among sources. The remote controller serves the
access as if its own thread had made it, so that thread's `pbase`/`pbound`
apply. The response, including any fault, returns to the sender. DMA
transfers may use these ranges too, for example to copy from the local store
straight into a consumer's local store.

Inside `vls_l1` the stage that translates and enters the cache is separate
from the processor/DMA arbiter. A core waiting on its own remote access keeps
serving incoming ones, so two cores reading each other's local stores cannot
deadlock. An incoming access takes priority over a local one when both are
ready.

`tb_vls_cmp` covers:

- remote loads and stores;
- access to a thread's own range;
- four cores in two pairs reading each other's local stores at once;
- a DMA transfer into a remote local store;
- a remote `pbound` fault;
- a suspended thread whose local store is read through the TLB after it
  was evicted, then read remotely again once it is resumed.

## Files

| File | Contents |
|---|---|
| `rtl/vls_pkg.sv` | constants, address layout, request/response structs, enums |
| `rtl/vls_regs.sv` | enabled, pbase, pbound and ways registers |
| `rtl/vls_tlb.sv` | TLB for regular accesses |
| `rtl/vls_addr_map.sv` | local-store check, pbase/TLB translation, pbound check, direct-mapped way |
| `rtl/vls_way_enable.sv` | tag/data array enables |
| `rtl/vls_sram.sv` | synchronous-read array with byte mask |
| `rtl/vls_repl.sv` | partition-aware LRU victim choice |
| `rtl/vls_cache_ctrl.sv` | the cache and its controller |
| `rtl/vls_dma.sv` | DMA engine |
| `rtl/vls_req_arb.sv` | processor/DMA arbitration and fence |
| `rtl/vls_remote_map.sv` | per-thread local-store map registers and decode |
| `rtl/vls_l1.sv` | one core's data cache with local store |
| `rtl/vls_xnet.sv` | core-to-core crossbar for remote local-store accesses |
| `rtl/vls_cmp.sv` | 16-core top |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_vls_fir.sv` | FIR-filter workload through the local store |
| `tb/vls_mem_model.sv`, `tb/vls_shared_mem.sv` | behavioural next-level memory (single- and multi-port) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`, and any failure is
printed with a reason. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/vls_pkg.sv tb/tb_vls_cmp.sv --top-module tb_vls_cmp
./obj_dir/Vtb_vls_cmp
```

Replace `tb_vls_cmp` with any other testbench name.

- `tb_vls_cmp` runs the full 16-core top at its default sizes.
- `tb_vls_l1` runs one core at full size through every single-core mechanism
  (about 125,000 cycles, over 7,000 checks). It ends with a tally of each
  mechanism and counts a failure for any that never occurred.
- `tb_vls_fir` runs a FIR filter (16 taps, 4096 outputs) on one full-size
  core as a local-store program. Input strips are double-buffered into the
  local store by DMA, and outputs are copied back out by DMA. It checks every
  output and the bypass, skipped-refill and hit behaviour the kernel relies
  on, in about 200,000 cycles.
- Some unit testbenches use smaller sizes to reach corner cases faster, for
  example a 4-set cache.

Memory contents in the models are a fixed function of the address
(`addr ^ 0x5A000000 ^ (addr[39:32] << 24)`). The testbenches compute expected
data from that function instead of reading files.

## Where this design departs from the original proposal, and its limits

- **Blocking cache, one DMA access in flight.** The evaluated system's DMA
  engine keeps 32 accesses outstanding. Here the cache handles one access at
  a time, so the DMA engine issues one word at a time. Transfers are correct
  but much slower than in the proposal. A non-blocking controller would be
  needed to match it.
- **Word-granular DMA.** Each element is a 32-bit read followed by a 32-bit
  write through the cache; lines are not moved in bursts.
- **No coherence, no L2.** The L1 caches have no coherence protocol. The
  shared L2, directory and memory network are outside the design: each core
  brings out its memory port. Regular data shared between cores is therefore
  not kept consistent. Remote local-store accesses do not need coherence,
  since they go to the one cache that holds the data.
- **Faults are only reported.** An access beyond `pbound`, a local-store
  access while disabled, and a TLB miss come back with `fault` set. What the
  processor or operating system then does is outside this design. Page walks
  are not built.
- **Chosen values.** The segment positions (`0xFFFF_FFFE` for the own local
  store, `0xFFFFFD` plus an 8-bit number for per-thread ranges), 4 KB pages, a
  40-bit physical address, true LRU, and adding the page index to `pbase` are
  this design's choices.
- **Thread migration.** Moving a thread to another core relies on coherence
  to move its local-store data, so it is not covered. Neither is a local
  store shared by several threads in the L2, nor the map register for it.
- **Conditional DMA transfers are not built.** These would write back only
  dirty lines. The proposal only suggests them as a possibility.
- **Remote-network timing is a placeholder.** Its zero-cycle forwarding was
  chosen for simplicity; the proposal gives no latency for it.
