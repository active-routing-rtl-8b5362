# Active-Routing: reductions computed inside a memory-cube network

Many kernels (dot products, sums over large vectors, sparse matrix-vector
products, the PageRank difference) read a lot of memory only to fold it into a
single number. This design moves that fold into the memory network. The host
is attached to sixteen stacked-DRAM cubes. Each cube has a small compute engine
beside its router. The host does not load the operands. It sends **Update**
packets, each naming one or a few operand addresses, an operation and a
*flow* (the variable being reduced). Each Update travels toward its data and is
computed in the cube nearest to its operands. That cube folds the result into
a per-flow partial result. The cubes an Update passes through remember the path,
and the paths of all of a flow's Updates together form a tree rooted at the
cube where the host link enters. When the host sends a **Gather**, it spreads
down that tree. Partial results then flow back up, and each cube combines its
children's values on the way. The host receives one value per root.

Everything in `rtl/` is synthesizable SystemVerilog. The design is built
around the engine. The vaults (DRAM), the host cores, their caches and the
on-chip network are outside it, and are modelled only in the testbenches.

## Topology, addresses and routing (`ar_pkg`, `ar_memory_network`)

* There are 16 cubes in a Dragonfly of 4 groups with 4 cubes each. Cube `c` is
  group `c[3:2]` and local index `c[1:0]`.
* Cube `(g,l)` has four ports. Port `k != l` goes to cube `(g,k)` in the same
  group. Port `l` is the cube's outside link:
  * When `l == g`, the outside link goes to the host. So cubes 0, 5, 10 and 15
    are the four *roots*, one per host link.
  * Otherwise it is the global link to cube `(l,g)`.
* The routing is minimal. Inside a group, a packet takes port `dst[1:0]`.
  Toward another group, it takes port `dst[3:2]`, which is either the global
  link itself or the hop to the group member that owns it. The most hops
  between any two cubes is three.
* An address maps to the cube given by bits `[35:32]`, so each cube holds 4 GB.
  How addresses spread over the vaults inside a cube is not modelled.
* With this wiring, an Update from root 0 to cube 8 goes 0 → 2 → 8. The
  two-operand case with operands in cubes 13 and 15 is computed in cube 12, the
  last cube that both routes share. `tb_ar_memory_network` checks exactly that
  tree.

## Packets and virtual channels

All packets are one flit of type `ar_pkt_t`. The fields are: packet type, 64-bit
flow ID, opcode, two 64-bit payloads `a`/`b`, flags (`two_opnd`, `imm2`), an
element count, destination and source cube, an operand-buffer ID, an operand
select bit, and `hop_port`. There are five packet types:

| type | carries | travels |
|---|---|---|
| `PKT_UPDATE` | operand addresses (or address + immediate), count 1..8 | host → tree, hop by hop |
| `PKT_GATHER_REQ` | flow ID | host → every tree node |
| `PKT_GATHER_RESP` | partial result in `a` | child → parent |
| `PKT_OPND_REQ` | address, buffer ID, operand select | compute cube → owning cube's vault |
| `PKT_OPND_RESP` | value | vault → compute cube |

The router keeps three virtual channels, each with its own FIFO at every input:

* requests (Update, Gather request and operand request);
* operand responses;
* Gather responses.

Responses never wait behind requests, so an engine stalled on requests can
still drain the responses it is waiting for. A link output sends only into a
channel that has room at the far end. Each hop costs one cycle.

## The life of a flow

A flow is identified by its target address. The controllers replace the low
two bits with the number of the root link, so each root's tree is a separate
*subflow* (the target must therefore be 4-byte aligned).

1. **Tree construction and Update phase.** Every engine an Update reaches
   registers the flow if it is not already present. It records the arrival
   port as the *parent*, then does one of two things:
   * If this cube is not the compute point, it forwards the Update toward the
     compute point and sets that port's *child* flag.
   * Otherwise it takes one operand buffer per element, increments `req_counter`
     and sends an operand request for each operand it needs.

   When an operand response arrives, it fills its buffer slot. When both
   operands are present, the buffer ID goes to the ready queue. The ALU then
   computes the element and folds it into the flow's `result`, and
   `resp_counter` is incremented.
2. **Gather phase.** The controllers hold a flow's Gather until all
   `nthreads` threads have sent one (the barrier). They then send a Gather
   request to each of the four roots. Each engine sets the flow's `Gflag` and
   copies the request to each child.
3. **Return.** A flow table entry is *done* when all three of these hold:
   `Gflag` is set, there are no child flags left, and
   `req_counter == resp_counter`. The engine then sends `result` to its parent
   and frees the entry. When a parent receives a child's response, it folds the
   value in and clears that child's flag. A root that no Update reached still
   answers its Gather, with the operation's identity value. The controllers
   combine the four root values and raise `commit_valid` with the target and
   the final value.

Which root an Update starts from is chosen by `root_mode`:

* **ART-tid** (0): link = thread ID mod 4. This spreads trees evenly, but
  ignores where the data is.
* **ART-addr** (1): the link whose root is the fewest hops from the operand
  (or from both operands). This gives shallow trees.

## Access patterns

The network interface register `CTRL[9:8]` selects how an Update's operands are
given:

* **regular-regular (0):** both operands are arrays, sent in cache-block
  granularity. One Update covers `count` consecutive 8-byte elements (up to
  8, one 64-byte block) of each array.
* **regular-irregular (1):** the host supplies the irregular operand's value as
  an immediate (`imm2`). The Update goes to the cube of the regular operand.
* **irregular-irregular (2):** one scalar operand pair per Update.

One-operand operations (sum, xor, and, min, max) fetch a single operand.

## The Active-Routing Engine (`ar_engine`)

The engine sits beside the router and has three inputs (requests, Gather
responses, operand responses) and one output into the router. Inside it:

* **Packet processing unit (`ar_ppu`)**: a small state machine that handles one
  packet at a time. Its priorities are:
  1. a flow that just became done (send the Gather response, free the entry);
  2. a child's Gather response (handed to the ALU to fold in);
  3. an incoming request.

  For an Update it works out the compute point. That is the cube where the
  routes to the two operands split, or the operand's own cube. It then either
  forwards the Update or creates the operand requests element by element. If
  no operand buffer is free, it stalls (`ev.ob_stall`). If the flow table is
  full, a new flow waits (`ev.ft_stall`). A Gather request sets `Gflag` and is
  copied to each child port.
* **Flow table (`ar_flow_table`)**: 16 entries. Each holds flow ID, opcode,
  result, `req_counter`, `resp_counter`, parent (2 bits), child flags (4) and
  `Gflag`. It does fully associative lookups, allocates the lowest free entry
  and computes the done condition. `result` starts at the opcode's identity
  value.
* **Operand buffers (`ar_operand_buffer`)**: a shared pool of 128 entries. Each
  holds flow ID, opcode, two operands and two ready bits. A *free queue* holds
  the IDs of free entries and starts full. A *ready queue* holds the IDs of
  complete entries. A buffer is reserved before its operand requests leave, so
  two-operand operations from several flows cannot deadlock by each holding
  half of their operands. A complete entry is issued to the ALU one cycle
  after it leaves the ready queue.
* **ALU (`ar_alu`)**: accepts one operation per cycle into a 9-stage pipeline
  (the multiply latency), followed by one reduce stage. The reduce stage
  combines the value with the flow's current `result` and writes the result
  back (10 cycles from issue to write-back). Two operations of the same flow
  in consecutive cycles take the previous result from the write-back register
  (the bypass, `ev.bypass`). Child Gather responses enter the reduce stage
  directly.

### Operations (`ar_op_e`)

| opcode | map | combine | identity |
|---|---|---|---|
| `SUM_I` / `SUM_F` | a | + | 0 |
| `XOR`, `AND` | a | ^, & | 0, all ones |
| `MIN_I`/`MAX_I`, `MIN_F`/`MAX_F` | a | min / max | ±largest, ±inf |
| `MAC_I` / `MAC_F` | a·b | + | 0 |
| `ABSDIFF_F` | \|a−b\| | + | 0 |

The `_I` variants use signed 64-bit integers and the `_F` variants use IEEE-754
doubles. The floating-point add and multiply are written out in `ar_pkg`. They
round to nearest-even and flush subnormal inputs and results to zero. Because
floating-point addition is not associative, the order in which a tree folds
partial results changes the last bits of a sum. The testbenches therefore use
operand values whose sums are exact.

## Host side

* **Network interface (`ar_network_interface`)**: one per core. The
  extended instructions write the registers SRC1, SRC2, TARGET, CTRL (opcode,
  access pattern, count) and NTHREADS. A write to ISSUE then emits an Update
  or Gather command tagged with the core's thread ID. While a command waits,
  further writes stall.
* **HMC controllers (`ar_hmc_ctrl`)**: one block for the four host links. They
  choose the root, run the Gather barrier in a 16-entry merge table, send
  Gathers to all roots, and combine and commit the four answers.
* **Top (`active_routing_top`)**: the interfaces, the controllers and the
  network. The on-chip path from the interfaces to the controllers is not part
  of the design. The top exposes `ni_cmd_*` and `hc_cmd_*`, and the caller
  moves commands from one to the other in order. The vaults attach through
  `vault_req_*` and `vault_rsp_*`, one pair per cube.

## Differences from the original description

* The `num_threads` barrier is kept in the controllers, not in the root cube.
  A flow can have four roots, and only the controllers see all of them.
* The root choice scheme that always uses cube 0 is not built. Only ART-tid
  and ART-addr are.
* Update operations that write memory (assignment) are not built. Results
  leave only through `commit_*`.
* Cache coherence (the directory check before offloading) and address
  translation are outside the design.
* Link serialisation, DRAM timing and vault interleaving are not modelled. The
  vault model answers after a fixed latency.
* The design has a deadlock risk: if more than 16 flows are live in one cube,
  a new flow's Update waits at the head of the engine input, and it can block
  the packets that would free an entry. The testbenches stay within 16 live
  flows per cube.
* All operations share the 9-cycle pipeline, including the ones that need no
  multiply.

## Simulating

All modules take their default parameters from the design:
* 16 cores and 16 cubes;
* per engine, 16 flow-table entries and 128 operand buffers;
* a 9-cycle ALU;
* router FIFOs 4 deep.

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/ar_pkg.sv tb/ar_tb_pkg.sv \
  $(ls rtl/*.sv | grep -v ar_pkg) tb/ar_vault_model.sv tb/ar_sys_driver.sv \
  tb/tb_active_routing_full.sv --top-module tb_active_routing_full -o sim
./obj_dir/sim
```

Compiling the whole system takes about a minute and a half with `-j 8`. The
simulation itself takes well under a second.

* `tb_active_routing_full` runs the design at its full default size.
  `tb_active_routing_top` runs it with 4 cores and 8 operand buffers per
  engine, so that stalls happen. Both use `ar_sys_driver`, which runs five
  phases:
  * a regular MAC with ART-addr;
  * a sum reduction with ART-tid;
  * a regular-irregular MAC;
  * three concurrent flows (min of doubles, max of integers, xor);
  * an absolute-difference sum.

  The driver checks every committed value against a reference computed in the
  testbench. It also counts each mechanism (registrations, forwards, element
  operations, operand requests, bypasses, Gather copies, child folds,
  responses, stalls) and fails if one of them never occurs.
* The vault model returns, for address `A`, the double
  `((A[34:3]*7 + A[35:32]*13) mod 201) − 100`. These are integers, so every
  sum and product is exact in doubles.
* `tb_ar_memory_network` checks the example tree. `tb_ar_router` checks the
  steering and channel independence under random back-pressure. `tb_ar_ppu`
  compares forwarding and scheduling with an independent route computation.
  The remaining testbenches check the flow table, operand buffer, ALU (every
  opcode bit-exact, latency 10 and the bypass), network interface and
  controllers one by one.

Verilator is a two-state simulator. All state that is read is reset; the FIFO
storage is not reset, but it is only read behind its valid bits.
