# OMEGA: scratchpads and in-scratchpad atomics for power-law graph analytics

Most real graphs follow a power law. A few vertices have most of the edges,
so most random accesses to per-vertex data (the *vtxProp* arrays, such as
`next_pagerank[]` or `ShortestLen[]`) go to a small set of vertices. Caches
handle this poorly. The hot vertices are scattered through large arrays and
are mixed with streaming edge data. Each access also moves a 64-byte block to
fetch a 4- or 8-byte value.

OMEGA uses that skew in three ways:

1. **Reorder and pin the hot vertices.** The graph is renumbered offline by
   decreasing in-degree, so the most-connected vertices get the lowest IDs.
   The vtxProp entries of the first `nvert` vertices live in scratchpads, one
   scratchpad beside each core, interleaved across all cores. Everything else
   stays in the normal cache hierarchy: the edge list, other data, and the
   vtxProp of all remaining vertices.
2. **Recognise accesses by address, not by new instructions.** Each core's
   scratchpad controller holds the base address, element size and stride of
   every vtxProp array. An ordinary load, store or atomic to one of those
   arrays, for a resident vertex, goes to the scratchpad of that vertex's
   home core. It travels as one word over the on-chip crossbar.
3. **Do the atomic where the data is.** Every scratchpad has a small
   programmable engine, the PISC (processing in scratchpad). A core sends
   "apply update X with operand v to vertex d" and moves on. The PISC at d's
   home reads the vertex's line, runs a short microprogram and writes the line
   back. While it runs, the controller holds back every other access to that
   vertex. The PISC also maintains the algorithm's active list (next
   frontier): a dense bit per vertex in the scratchpad, or vertex IDs pushed
   out to memory.

A small **source vertex buffer** per node also caches source-vertex values
read from remote scratchpads. It is flushed at every iteration boundary.

The RTL here covers everything OMEGA adds to a 16-core chip multiprocessor:

- the configuration registers;
- the monitor, partition and index units;
- the 1 MB scratchpad;
- the PISC with its ALU and IEEE double adder;
- the source vertex buffer;
- the scratchpad controller;
- the crossbar.

The cores, L1/L2 caches, coherence protocol and DRAM are not included.
Their connection points are brought out as ports.

## Top level: `omega_top`

`omega_top` contains 16 `omega_node`s and two 16x16 `xbar`s:

- one crossbar carries requests;
- the other carries replies, so a reply can never wait behind a request.

Top-level ports:

- **Per core** (arrays of 16):
  - a word-granular request port: `core_req_valid/ready`, `core_req`;
  - `core_to_cache`, which flags an access the node does not own;
  - the read reply: `core_resp_valid/data`;
  - a sparse active-list output: `push_valid/ready/vid`;
  - an event vector `ev` (one pulse per mechanism, for counting).
- **Broadcast to all nodes:**
  - a configuration bus: `cfg_we`, `cfg_addr`, `cfg_wdata`;
  - `iter_end`, which flushes the source vertex buffers.
- **`init_done`:** rises when every scratchpad has cleared itself after
  reset. That takes 65536 cycles at the default size.

Core request operations (`op_e` in `omega_pkg`):

| op | meaning | reply |
|---|---|---|
| `OP_RD` | read one Prop (1–8 bytes, zero-extended) | yes |
| `OP_WR` | write one Prop (byte-masked into the line) | none (posted) |
| `OP_RD_SRC` | read of a *source* vertex's Prop; may be served by the source vertex buffer | yes |
| `OP_ATOMIC` | offload update type `optype` with operand `data` to the vertex's home PISC | none (posted) |
| `OP_RD_ACT` | read and clear the dense active bit of a Prop (collects the next frontier) | yes, bit 0 |

Behaviour of the core port:

- A request is accepted when `core_req_valid && core_req_ready`.
- If `core_to_cache` is high in that cycle, the address is not scratchpad
  resident and the request is the cache's business. Nothing else happens.
- Each node has at most one outstanding read, so replies carry no tag.

## From address to scratchpad line

This is the part a user must get right when configuring the design. Each
node holds the same registers (`cfg_regs`, address map in `omega_pkg`):

| addr | register | meaning |
|---|---|---|
| `0x00+k` | `start_addr[k]` | base virtual address of vtxProp *k* (k = 0..2) |
| `0x04+k` | `type_size[k]` | bytes per element, 1..8 |
| `0x08+k` | `stride[k]` | bytes between consecutive vertices (= type_size for a plain array, the struct size for a field of an array of structs) |
| `0x0C` | `nvert` | number of resident (most-connected) vertices |
| `0x0D` | `chunk` | interleaving chunk, in vertices |
| `0x0E` | `nprops` | number of vtxProps in use |
| `0x10+i` | PISC global register *i* | constants for microprograms |
| `0x14+t` | PISC entry point of update type *t* | |
| `0x20+j` | PISC microcode word *j* (0..31) | |

An address goes through three combinational units:

1. **Monitor unit.** vtxProp *k* matches when all of these hold:
   - `start[k] <= addr`;
   - `addr < start[k] + nvert*stride[k]`;
   - `(addr-start[k])` is a multiple of `stride[k]`.

   The multiple test separates fields of one struct that share a stride.
   The vertex ID is `(addr-start[k])/stride[k]`. With no match, the access
   goes to the cache.
2. **Partition unit.** `home = (vid / chunk) mod 16`. Consecutive chunks of
   vertices go to consecutive nodes.
3. **Index unit.** `line = (vid / (16*chunk))*chunk + vid mod chunk`, the
   position of the vertex among the vertices its home owns. Each home fills
   its scratchpad densely from line 0.

Set `chunk` to the chunk size of the framework's static OpenMP schedule.
Then a thread that sweeps its share of vtxProp in order (for example,
copying `next_pagerank` to `curr_pagerank`) touches only its own scratchpad.
With mismatched chunks, most such accesses become remote.

Example: with `chunk = 4`, vertex 37 is in chunk 9, so its home is node 9.
Its line there is `(37/64)*4 + 37%4 = 1`.

The dividers are general combinational dividers, so chunk and stride need
not be powers of two. They are the longest paths in the design. A
frequency-critical implementation would restrict these values to powers of
two or pipeline the division.

## Scratchpad line layout

`scratchpad` is a 65536 x 16-byte direct-mapped array: 1 MB per node, 16 MB
in total.

- **One line holds all Props of one vertex.** They are packed in Prop order
  at byte offsets that `cfg_regs` derives from the type sizes. An atomic
  therefore sees every field it needs in one access. SSSP, for example,
  needs both its length and its visited flag.
- **Active bits.** Each line also has three active-list bits, one per Prop.
- **Timing.**
  - One access per cycle.
  - Reads return `SP_LAT = 3` cycles later.
  - A read returns the data from before a write issued in the same cycle.
  - Byte masks select the Prop being written.
  - Active bits have their own write enables, so a read-and-clear is one
    access.
- **Reset.** After reset the array clears itself one line per cycle. Requests
  are ignored until `init_done`.

The largest vertex record in the target algorithms is 12 bytes (three
vtxProps, as in Radii), so 16 bytes covers every case. The cost: a 4-byte
BFS entry also takes a whole 16-byte line. See *Capacity* below.

## The scratchpad controller (`sp_controller`)

This is the most intricate block. It owns the single scratchpad port and
arbitrates three sources:

1. **PISC write-back.** Highest priority, so an update finishes
   deterministically.
2. **Local core slot.** One request from the core, already classified by the
   monitor, partition and index units.
3. **Remote slot.** One request that arrived from another node over the
   request crossbar.

Reads that will become replies are tracked through a tag pipeline that follows
the 3-cycle scratchpad.

Slots 2 and 3 share the port round-robin. What happens to a core request:

| case | action |
|---|---|
| not resident | `core_to_cache`, done |
| local home, read/write/read-act | scratchpad access from the local slot; reads reply after 5 cycles |
| local home, atomic | scratchpad read, line handed to PISC, write-back; no reply |
| remote home | one request flit to the home node; reads wait for the reply flit |
| `OP_RD_SRC`, remote home, buffer hit | answered from the source vertex buffer in the next cycle; nothing sent |
| `OP_RD_SRC`, remote home, miss | remote read; the reply also fills the buffer |

At the home node, the remote slot executes a request exactly like a local
one. Reads answer with a reply flit through a 4-entry reply queue. The slot
accepts a new request only when the queue is guaranteed to have room.

**Atomicity.** While the PISC works on line *L*, `atomic_busy` and
`atomic_line` are set. Any slot whose request targets line *L* waits; the
`ev.block` pulse counts these stalls. Requests for other lines keep using the
scratchpad port around the PISC. A second atomic waits until the PISC is
free.

**Head-of-line effect.** Remote requests enter through a single slot in
arrival order. So a remote request held back by an update also holds back
the remote requests behind it, even for other vertices. The core's own
requests are not affected. This keeps the controller small and loses nothing
in correctness.

**Packets.** A flit is 128 bits, the crossbar width (`flit_t`):

- packet kind;
- destination node and source node;
- Prop index;
- update type;
- vertex ID;
- home line (computed by the sender's index unit);
- 64-bit data word (the Prop value, or the atomic's operand).

Every scratchpad message is one flit.

**Timing at the core port** (checked by `tb_sp_controller`):

| access | cycles from accept to `core_resp_valid` |
|---|---|
| local read, port free | 5: slot register, 3-cycle scratchpad, reply register |
| source vertex buffer hit | 1 |
| remote read | 5 at the home, plus two crossbar traversals (1 cycle each when uncontended), plus input/output registering |

Writes and atomics are posted: the core can go on with its next request.

## PISC: microcoded atomics

`pisc` runs one update at a time on a line copy handed over by the
controller. It has:

- a **microcode store:** 32 words, written over the configuration bus;
- an **entry table:** the start address of each of the 4 update types;
- **4 global registers:** constants such as "no parent" or "visited";
- **4 working registers, R0–R3:** R0 starts as the request's operand, the
  others at zero;
- **one flag** set by compares;
- the ALU (`pisc_alu`), which contains the double-precision adder
  (`fp64_add`).

A micro-op (`uop_t`, 17 bits) has these fields:

| field | meaning |
|---|---|
| `op` | `END`, `LDP` (load Prop k of the line into rd, zero- or sign-extended by `sx`), `LDG` (load global k), `ALU` (rd = ra fn rb), `CMP` (flag = ra fn rb), `STP` (store ra into Prop k), `SETACT` (set dense active bit of Prop k), `PUSH` (emit the vertex ID on the sparse active-list port) |
| `pred` | always / only if flag / only if not flag |
| `fn` | ALU: fp add, int add, unsigned min, signed min, or, move. CMP: equal, not equal, unsigned less, signed less |
| `rd ra rb k sx` | registers, Prop index, sign-extend |

A skipped `END` falls through. Any executed `END` ends the program.

Timing:

- Each micro-op takes one cycle.
- A `PUSH` waits for `push_ready`.
- The write-back takes one more cycle.

PageRank's update (`LDP; ALU fadd; STP; END`) therefore writes back 5 cycles
after `start`.

Two of the microprograms used in the testbenches (`omega_tb_pkg`; `tb_omega_algos`
has three more):

```
BFS  (claim parent):   R1 = Prop0; R2 = G0 ("none"); flag = (R1 == R2)
                       if !flag END; Prop0 = R0 (parent = source); SETACT; PUSH; END
SSSP (relax):          R1 = Prop0 (signed); flag = R0 < R1; if !flag END
                       Prop0 = R0; R2 = Prop1; R3 = G1; flag = (R2 == R3)
                       if flag END; Prop1 = R3 (visited); SETACT; END
```

Any update built from these micro-ops fits. That includes fp add
(PageRank, BC), unsigned or signed min (CC, SSSP, Radii), or (Radii's
bitmasks) and integer add (TC, KC). The framework writes the microcode and
entry points once, before the run.

**Active lists:**

- **Dense lists:** the PISC sets the Prop's active bit in the line. The
  framework collects and clears the bits with `OP_RD_ACT`.
- **Sparse lists:** the PISC presents the vertex ID on `push_*`. Writing it
  to memory through the L1 is left to the core side.

## Source vertex buffer

`src_vertex_buffer` is a 16-entry, fully associative, read-only store.

- It is keyed by {Prop, vertex ID} and replaced in FIFO order.
- Lookup is combinational.
- A fill happens on a remote `OP_RD_SRC` reply.
- `iter_end` clears it. That is the only coherence it needs: source values
  are not written during an iteration of the algorithms that use it.
- If software writes a source value mid-iteration anyway, a node may keep
  seeing the old copy until the next `iter_end`. `tb_omega_top` checks
  exactly this behaviour.

## Crossbar

`xbar` is an N x N crossbar with these properties:

- valid/ready handshakes;
- a round-robin arbiter per output among the inputs whose head flit targets
  it;
- one output register per port.

An uncontended flit crosses in one cycle, and a stalled output holds its
flit. Two instances are used, one for requests and one for replies.

The reference system reports an average of about 17 cycles for a remote
scratchpad access on its simulated network. This crossbar is a minimal
single-stage one and is not padded to match that latency.

## Capacity and workloads

At the default size, 16 x 65536 = 1,048,576 vertices can be resident. The
design aims to hold the ~20 % most-connected vertices.

| Graph | Vertices | Does 20 % fit? |
|---|---|---|
| sd, ap, rMat, orkut, wiki, rPA, rCA | 0.07 M – 4.2 M | yes |
| lj | 5.3 M | just misses: 1.06 M needed, 19.8 % resident |
| USA | 6.2 M | no: 16.9 % resident |
| ic | 7.4 M | no: 14 % resident |
| uk | 18.5 M | no: 5.7 % resident |
| twitter | 41.6 M | no: 2.5 % resident |

Vertices beyond `nvert` simply use the caches, so every graph still runs
correctly.

Smaller scratchpads (8 MB or 4 MB in total) are a `SP_LINES_P` override
(32768 or 16384 lines per node).

## Where this RTL departs from the reference OMEGA design

- **Fixed 16-byte line per vertex.** The reference design's capacity figures pack
  entries by their actual size: 4 MB holds 20 % of lj for 4-byte BFS
  entries. Here a vertex always takes one 16-byte line, so for 4- or 8-byte
  records the same scratchpad holds 2–4x fewer vertices.
- **Remote latency.** It is set by this crossbar (a few cycles), not the
  ~17 cycles of the reference network.
- **Request handling.**
  - One outstanding read per core.
  - Posted writes and atomics.
  - A single remote slot with head-of-line blocking.
  - `OP_RD_ACT` as the way to read the dense active list.
- **Own choices where the published design gives only the function:**
  - register map;
  - flit format;
  - micro-op format;
  - sizes of microcode, registers and source vertex buffer;
  - reset clear sweep.
- **Sparse active-list pushes** stop at the `push_*` port. The path through
  the L1 into memory belongs to the core and cache, which are not modelled.
- **The core-side runtime is not hardware and is not included:**
  - offline in-degree reordering;
  - the source-to-source translator that generates microcode and
    configuration stores.

## Files

- `rtl/omega_pkg.sv`: constants, request/flit/config/micro-op types,
  configuration address map.
- `rtl/cfg_regs.sv`, `monitor_unit.sv`, `partition_unit.sv`,
  `index_unit.sv`: configuration and address mapping.
- `rtl/scratchpad.sv`: storage.
- `rtl/fp64_add.sv`, `pisc_alu.sv`, `pisc.sv`: the atomic engine.
- `rtl/src_vertex_buffer.sv`, `sp_controller.sv`, `omega_node.sv`: a node.
- `rtl/xbar.sv`, `omega_top.sv`: the 16-node system.
- `tb/omega_tb_pkg.sv`: micro-op encoder and the PageRank, BFS, SSSP and CC
  microprograms.
- `tb/tb_<block>.sv`: one self-checking testbench per block.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. A watchdog ends a hung run with a failure.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -yrtl -ytb \
    rtl/omega_pkg.sv tb/omega_tb_pkg.sv tb/tb_omega_top.sv --top tb_omega_top
./obj_dir/Vtb_omega_top
```

Replace `tb_omega_top` with any other testbench name.

What each testbench covers:

- **Block testbenches:**
  - random and corner-case values against independent reference models:
    the IEEE adder against the simulator's own `real` arithmetic, address
    maps against their formulas;
  - the 3-cycle scratchpad latency;
  - the 5-cycle local read and 1-cycle buffer hit;
  - the 5-cycle PageRank update;
  - the one-cycle crossbar crossing;
  - blocking of same-vertex requests during an update.
- **`tb_omega_top`:** runs the full-size system with no parameter overrides.
  A 512-vertex, 1500-edge power-law-like graph has 128 vertices resident in
  chunks of 4. It runs:
  - PageRank scatter with fp-add atomics;
  - frontier-based SSSP with the source vertex buffer and dense active bits;
  - BFS with sparse pushes;
  - a check of buffer staleness across `iter_end`.

  Results are compared with reference computations. It also counts every
  mechanism and fails if one never occurs: cache path, local, remote,
  served, buffer hit and fill, atomic, block, push, active bit and flush.
  It takes about 40 s of simulation plus the build.
- **`tb_omega_algos`:** the same full-size system with its own microprograms,
  loaded over the configuration bus. It runs:
  - a degree count with signed-add updates (the update of TC and KC);
  - connected components with unsigned-min label propagation;
  - Radii, a multi-source BFS on 8-bit-mask frontiers. Each vertex is a
    12-byte struct of three 4-byte fields sharing one stride, so all three
    Props share a line. The current round number is passed to the PISCs
    through a global register.

  About 40 s as well.
