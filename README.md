# In-cache streaming communication infrastructure

Many-core accelerators often spend more time moving data than computing on it.
A plain cache is a poor fit for the complex but fully predictable access
patterns of many kernels: zig-zag scans, tiles, diagonals, crosses. This design
lets every processing element (PE) turn ways of its private set-associative
cache into stream buffers at run time, with no reconfiguration delay. A central
memory controller then generates the access patterns itself, from compact
*descriptor graphs*, and pushes the data to the PEs as streams. Streams can be
unicast, broadcast to every PE, or sent from one PE to another. Ordinary
load/store traffic keeps working through the ways that stay in cache mode.

The RTL is SystemVerilog-2017 and synthesizable, apart from the DDR3 memory
model used by the testbenches. The processors are outside the design: each
PE's side of its cache controller is a port of the top module.

```
 PE 0 ─ icsc ─┐   PE 1 ─ icsc ─┐      ...      PE 63 ─ icsc ─┐
              │                │                             │
   ┌──── ring_node 0 ──── ring_node 1 ──── ... ──── ring_node 63 ──── ring_node 64 ────┐
   └────────────────────────── (bidirectional ring) ────────────────────────│─────────┘
                                                                             │
                                                 mem_ctrl ──┬─ dma           │
                                                            └─ smc: pdc (stream), pdc (prefetch),
                                                                    desc_mem, burst_ctrl,
                                                                    reorder_buf, stream FIFO
                                                               │
                                                    memory access bus (to DDR3)
```

## Descriptor graphs: how access patterns are written

This part of the design has the most to explain, and everything in the
memory controller depends on it.

### One descriptor

A descriptor describes an affine loop nest:

    y = offset + x0 + Σk xk · stride_k        0 ≤ x0 < hsize,  0 ≤ xk < vsize_k

`x0` is the innermost loop and walks a contiguous block of `hsize` words.
Each *dynamic pair* `{stride_k, vsize_k}` adds one more loop level; pair 1 is
the next loop out. A descriptor may have 0 to 7 pairs, so a plain array costs
only one 64-bit word.

A descriptor can also carry a *modifier chain*. This is a target mask plus up
to three `fmod` values. After each complete solve of the descriptor, `fmod_i`
is added to the i-th field selected by the mask. The header's `iter` field
counts how many more times this may happen. The change is written back into
the descriptor memory, so the next visit sees the modified descriptor.

Mask bits: bit 0 = offset, bit 1 = hsize, bit 2k = stride_k, bit 2k+1 = vsize_k.

### Graphs

Each descriptor may carry two 8-bit references: `next` (a child) and `level`
(the next sibling). 255 means none.

- **Offset-type** descriptors have a child. Each point they generate becomes
  the base offset for their whole child chain (`next`, then that child's
  `level` siblings, and so on).
- **Address-type** descriptors have no child. They produce memory addresses:
  their points plus the inherited offset.

The graph is solved child-first. With modifier chains, a few words describe
patterns that would otherwise need a long address list. For example, an 8×8
zig-zag scan takes 7 descriptors (17 words): every diagonal is a short
descriptor whose offset and length are changed by its modifier chain after each
use.

### Memory layout (this design's encoding)

The descriptor memory has 256 words of 64 bits.

| word | contents |
|---|---|
| 0 | `header[63:48]`, `hsize[47:32]`, `offset[31:0]` |
| 1.. | 16-bit fields, four per word from the low lane up: `stride_1, vsize_1, …, stride_n, vsize_n`, then `mask, fmod_1..fmod_m` if m > 0, then `{level[15:8], next[7:0]}` if graph_p |

Header: `{size[15:13], msize[12:11], iter[10:1], graph_p[0]}`. `size` is the
number of dynamic pairs and `msize` the number of fmods.

Strides and fmods are signed 16-bit values. The offset is 32-bit. A stride
outside ±32767 therefore has to be expressed as a deeper graph; the tiled test
pattern does this. `tb/tb_desc_pkg.sv` contains an encoder function that builds
these words.

### Pattern description controller (`pdc`)

The graph solver is an FSM with a descriptor stack (default depth 8). For each
descriptor it does the following:

1. It loads the descriptor: 2 cycles per 64-bit word, with the word count taken
   from the header.
2. An offset-type descriptor is pushed on the stack together with its iteration
   state, and the solver goes down to its child.
3. An address-type descriptor is handed to the `agu`, which emits **one address
   per cycle** (valid/ready).
4. The `dcu` then applies the modifier chain: one cycle per modified field plus
   one header write.
5. The solver then follows `level` to the next sibling. At the end of a chain it
   steps the descriptor on top of the stack once, using the same step function
   as the AGU, or pops it when that descriptor is exhausted.

In *row mode* the AGU emits one `{start, hsize}` item per contiguous block
instead of single addresses. The burst and prefetch paths use this mode.

Departure: descriptor loading and modifier chains do not overlap with address
generation. The rate is one address per cycle *within* an address-type
descriptor, not across descriptor switches. A pattern made of many tiny
descriptors, such as zig-zag, therefore runs below one address per cycle at the
PDC. This hardly matters when every address costs a 20-cycle memory access.

## Stream management controller (`smc`) and memory controller (`mem_ctrl`)

The memory controller has one ring port and one memory access bus. Behind them
sit a DMA, for cache line reads and write-through stores, and the SMC. The two
alternate on the bus, which is held for a whole transaction.

A stream command is a 2-flit message from a PE:

- flit 0 is `{mode[31:30], store[29], bcast[28], rsv, prefetch_ref[23:16], pattern_ref[15:8], sid[7:0]}`;
- flit 1 is the base offset.

Commands are queued (depth 4) and run one at a time. The modes are:

| mode | what happens | cost |
|---|---|---|
| `SMC_DIRECT` | every PDC address is one single-word memory read | ~22 cycles per word with a 20-cycle request overhead |
| `SMC_BURST` | the PDC runs in row mode; `burst_ctrl` splits each block into bursts of at most 256 words | ≈1 word/cycle for long blocks |
| `SMC_REORDER` | a second PDC (row mode, its own descriptor) prefetches a region in bursts into `reorder_buf`; the pattern PDC reads `base + offset` out of it, waiting for words not yet arrived | the pattern is free of memory latency |
| store (`SMC_DIRECT` + `store`) | incoming stream words from a PE are written to the PDC's addresses | one memory write per word |

Read data leave through a stream FIFO as single-flit stream messages. They go
to the commanding PE with the command's `sid`, or to every PE if `bcast` is
set.

The reorder buffer is 1024 × 32-bit (4 kB), direct-mapped, with a tag per
line. A prefetch region larger than 1024 words can overwrite words before they
are read, so prefetch blocks must fit the buffer.

Memory access bus: `mreq_valid/ready` with `we`, `addr`, `len` and `wdata`.
Writes are single words. Reads return `len` words in order on
`mr_valid/ready/data`. There is one outstanding transaction.

## In-cache stream controller (`icsc`)

Each controller sits next to an 8 kB, 4-way cache with 64-byte lines (32 sets).

**Address mode.** Loads hit in one cycle after the tag check. A miss fetches
the 16-word line over the ring and fills the binary-tree pseudo-LRU victim
among the ways the cache owns. Stores are write-through and no-allocate: the
cached copy is updated on a hit. If the cache owns no way, loads bypass it.

**Way ownership.** A 4-bit register says which ways belong to the stream
controller. The PE sets it with `OP_CFG_WAYS`. Configuring a stream also claims
the stream's way. Lines of a way that is handed over are dropped. Nothing else
waits.

**Stream mode.** Each of the 8 stream-table entries holds:

- the way;
- a `START..END` word range inside that way, used as a circular buffer;
- read and write pointers and a word count;
- the direction;
- the destination node and stream id;
- a broadcast flag.

The PE operations are:

- `OP_SPUSH` appends a word to an output stream.
- `OP_SPOP` takes a word from an input stream.
- Output words are sent as soon as they are in the buffer.
- Incoming stream flits are written to their buffer.
- A push into a full stream or a pop from an empty one waits.

`OP_CFG_STRM` encoding:

- `pe_sid` selects the entry.
- `pe_wdata = {en[31], out[30], way[29:28], dest[27:20], dest_sid[19:12], bcast[11]}`.
- `pe_addr = {END[24:16], START[8:0]}`.

The PE interface takes one operation at a time (`pe_req`/`pe_ready`) and
answers each with `pe_rsp_valid`.

## Ring (`ring_node`)

There is one node per PE plus one for the memory controller (node `N_PES`).
Each node has three inputs (local, left, right), and each input has a 4-deep
register FIFO.

- Unicast flits take the shorter way round.
- Broadcasts travel clockwise. Every node passes a copy to its component, until
  the next node would be the source.
- Each output serves its inputs in an order set by a round-robin pointer. The
  pointer moves on when a message completes.
- An output stays locked to one input until that input's `last` flit, so
  messages never interleave.

A flit is `{bcast, src[8], dst[8], type[3], sid[8], last, data[32]}`. The
message types are:

- line read request;
- line read response (16 flits);
- store (2 flits);
- stream word;
- stream command (2 flits).

Ready never depends on valid anywhere on the ring. This is required, because a
ring node's output valid depends on its output ready.

## Measured behaviour

All numbers come from the testbenches, with a DDR3 model that charges 20 cycles
per request and then delivers one word per cycle. At 100 MHz and 32-bit words:

| case | cycles | throughput | reference figure for the original architecture |
|---|---|---|---|
| linear 1024 words, burst mode | 1119 | 366 MB/s | 371 MB/s |
| zig-zag 8×8, direct mode | 1429 | 18 MB/s | 19 MB/s |
| zig-zag 8×8, reorder mode (8 bursts of 8) | 389 | 66 MB/s | 90 MB/s (each block prefetched with one burst) |
| 64-word burst stream to a PE, end to end at 64 PEs | 105 from command to last word | 64 words in 64 consecutive cycles | – |

## Departures and limitations

- **No snooping.** A store does not invalidate copies of the line in other
  PEs' caches.
- **No persistent streams.** Stream words are freed once sent. They cannot be
  kept for later reuse.
- **PDC overlap.** The PDC does not overlap descriptor loading and modifier
  chains with address generation (see above).
- **Field widths.** Strides are 16-bit, so very large strides (such as 36864 or
  49152 words) need a graph re-encoding. The tiled test pattern uses a 3-level
  graph with a modifier chain.
- **Printed example values.** Some values printed in the original zig-zag
  example did not reproduce the scan with the formula above, so the testbenches
  use a corrected encoding with the same graph shape.
- **Reorder buffer.** It is a single direct-mapped bank, not several stream
  banks. A prefetch region must not exceed 1024 words.
- **SMC sequencing.** The SMC is not run by a programmable sequencer. Each PE
  sends its stream commands, and the SMC queues them in a small FIFO.
- **Stream scheduling.** No scheduler grants outgoing streams. A stream word
  leaves as soon as its ring node accepts it, and the round-robin ring
  arbitration shares the links.
- **Reorder buffer bookkeeping.** The reorder buffer keeps a tag per word
  instead of a stream table. Stream splitting and merging work only in one
  way: a descriptor can pick any sub-pattern from a prefetched region.
- **Not included.** The processors, a central system manager that changes way
  ownership, and the DDR3 controller are not part of the RTL.
- **Synthesis at full size.** Coarse synthesis of `ics_top` with 64 PEs is slow
  (more than 10 minutes in yosys). Lint and elaboration pass.

## Files

`rtl/` contains:

- Packages: `pdc_pkg` (descriptor types, iteration step), `ring_pkg` (flits),
  `ics_pkg` (PE operations, stream command).
- Modules, bottom-up: `sfifo`, `agu`, `dcu`, `desc_mem`, `pdc`, `burst_ctrl`,
  `reorder_buf`, `smc`, `dma`, `mem_ctrl`, `ring_node`, `icsc`, `ics_top`.

`tb/` contains:

- one self-checking testbench per block (`tb_<block>.sv`);
- `ddr_model.sv`, the behavioural memory;
- `tb_desc_pkg.sv`, the descriptor encoder;
- two end-to-end testbenches, which share `ics_top_env.svh`:
  - `tb_ics_top` uses 4 PEs;
  - `tb_ics_top_full` uses the default 64 PEs.

The end-to-end test exercises every mechanism and prints a count for each.
The mechanisms are cache hits and misses, pseudo-LRU replacement, write-through,
way hand-over, direct, burst and reorder streams, broadcast, PE-to-PE streams,
stream store, bursts, DMA reads and ring conflicts.

Every testbench prints `TB_RESULT checks=N failures=M` and stops through a
watchdog if it hangs.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ics_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/pdc_pkg.sv rtl/ring_pkg.sv rtl/ics_pkg.sv tb/tb_desc_pkg.sv tb/tb_ics_top.sv
./obj_dir/Vtb_ics_top
```

Replace `tb_ics_top` with any other testbench name. The 64-PE test takes about
two minutes to compile and under a second to run.
