# Chiplet GAN accelerator: adaptive-topology NoC and passive/active NoP

This is SystemVerilog RTL for a chiplet-based accelerator for GAN inference. The main idea
concerns communication more than arithmetic. GAN layers mix three traffic patterns:

- matrix multiplications exchange data between neighbouring processing elements (PEs);
- normalisation needs reductions of activation statistics;
- up-sampling and reshape (transpose) scatter activations to other PEs, often on other chiplets.

The design serves each pattern with a matching network:

- **Inside a chiplet**, the 4x4 PE network switches per region between a plain 4x4 **mesh**
  and a **C-Mesh** (concentrated mesh). In C-Mesh, the four PEs of each 2x2 region share
  their region's corner router, and the four corner routers are joined by express links. The
  mesh suits neighbour exchange; the C-Mesh suits gathering, scattering and traffic to
  memory or other chiplets.
- **Between chiplets**, chiplets are grouped in 2x2 tiles. Adjacent chiplets talk over
  **passive links** (plain wires between corner routers). Everything else goes over
  **active links** through a router placed on the interposer, the NoP (network-on-package)
  router. The NoP routers of neighbouring tiles are linked too.

The default build is 4x4 chiplets × 4x4 PEs, i.e. 256 PEs.

- Each PE has 16 FP32 multipliers and 16 FP32 adders.
- Each PE has a 144-word accumulation buffer and two 244-word SRAMs (activations, weights).
- Links are 512 bits wide.
- A packet is 4 flits: one head flit and three payload flits, i.e. 48 FP32 words.

## Hierarchy

```
cg_system                    package: chiplets, NoP routers, passive/active links
├─ cg_chiplet  [R][C]        16 PEs, 16 routers, 4 topology controllers, muxes
│  ├─ cg_router  x16         5-stage VC router (corner routers: 9 ports, others: 6)
│  ├─ cg_ni      x16         packet <-> flit conversion, per-VC receive buffers
│  ├─ cg_pe      x16         PE controller + memories + MAC array + activation unit
│  │  ├─ cg_sram   x2        activation SRAM (1 read port), weight SRAM (16 read ports)
│  │  ├─ cg_mac_array        16 cg_fp_mul, rotating crossbar, 16 cg_fp_add, 144-word buffer
│  │  └─ cg_act_unit         ReLU, normalisation, statistics, up-sampling, transpose
│  ├─ cg_link_mux x20        12 PE attachment muxes + 8 express-link muxes
│  └─ cg_topo_ctrl x4        one per concentration region
└─ cg_router (IS_NOP=1)      one NoP router per 2x2 chiplet tile, 8 ports
```

- `cg_pkg` holds the flit, packet header and address types.
- `cg_route_pkg` holds the routing functions.

## Packets, addresses and commands

A packet is `packet_t`: a header (`header_t`) plus 48 payload words. Word *i* is at bits
`[32*i +: 32]`. The header travels in the head flit.

A node address (`node_addr_t`) has these fields:

- the chiplet row and column;
- the router row and column within the chiplet;
- a `mem` bit. It selects the memory port of a corner router rather than its PE.

A PE is programmed only by packets: each packet is one command (`opcode_e`). The PE runs
one command at a time.

| opcode | effect |
|---|---|
| `OP_WR_ACT/WGT/ACC` | store `len` payload words at `addr` in the activation SRAM, weight SRAM or accumulation buffer |
| `OP_MATMUL` | `acc[addr3+i*P+j] += Σk act[addr+i*N+k] * wgt[addr2+k*P+j]`. `flag` clears the buffer first. Takes M·⌈P/16⌉·N cycles |
| `OP_RELU`, `OP_NORM` | `m` elements from `acc[addr..]` to `act[addr2..]`. The normalisation computes `(x-a)*b`, with `a` = mean and `b` = 1/σ taken from the header |
| `OP_STATS` | accumulate Σx and Σx² over `m` elements (`flag` clears them first) |
| `OP_STAT_ACC` | add a received (Σx, Σx²) pair. This is the cross-PE reduction |
| `OP_UPSAMPLE` | expand an m×n block by factor `p`: nearest neighbour, or zero insertion if `flag` is set |
| `OP_RESHAPE` | transpose an m×n block |
| `OP_SEND` | send `len` words of act (`flag`=0) or acc (`flag`=1) to node `rdst` as a packet with opcode `rop` at address `addr2`. PE-to-PE and PE-to-memory data movement uses this |
| `OP_SEND_STAT` | send the statistics to `rdst` as `OP_STAT_ACC` |
| `OP_LAYER_END` | tell the region's topology controller that the layer is done. `m` is the communication class of the next layer. The PE then waits for the release |

The matrix multiplication is output stationary:

- one activation is broadcast to 16 multipliers per cycle;
- the 16 multipliers get 16 weights;
- the 16 products are added into 16 consecutive accumulation-buffer words.

The buffer is 16 banks of 9 words. A crossbar rotates the products by `base % 16`, so that any
16 consecutive words update in one cycle.

## The router

`cg_router` is used both inside chiplets and on the interposer.

- **Pipeline.** Five one-cycle stages: route calculation, VC allocation, switch allocation,
  switch traversal, link traversal. A head flit written into an input buffer in cycle *t*
  is in the next router's buffer in cycle *t+5*.
- **Buffers and flow control.** Each port has 2 virtual channels of 4 flits. Flow control is
  credit based: one credit pulse per VC goes back upstream.
- **Routing.** Deterministic, X first then Y.
- **Allocation.** A packet keeps its VC number on every hop. The VC is chosen from the
  destination address (`vc_of`), so all packets to one destination follow one chain of
  FIFOs and arrive in order. The PE relies on this: commands from one sender to one PE must
  not overtake each other.

### Routing inside and between chiplets (`cg_route_pkg`)

- **To a PE in a mesh region:** the packet goes to that PE's own router.
- **To a PE in a C-Mesh region:** the packet goes to the region's corner router, which
  delivers it on local port `P_LOC + slot`.
- **Memory ports:** these are always on the corner routers.

Traffic to another chiplet leaves through a corner router:

- **Adjacent chiplet:** the packet takes the passive link.
  - Horizontal neighbours are joined at the corners on the tile's outer row, using X ports.
  - Vertical neighbours are joined at the corners on the tile's outer column, using Y ports.
- **Any other chiplet:** the packet goes to the chiplet's *inner* corner, the one facing the
  tile centre. It leaves on that corner's outward Y port, which is the active link to the
  tile's NoP router. It crosses the NoP with X-then-Y routing, then goes down the active
  link to the destination's inner corner.

## Topology switching, the delicate part

Each region has a `cg_topo_ctrl`. Switching works as follows.

1. After a layer, all four PEs of the region send `OP_LAYER_END` with the class of the next
   layer. The PEs then stop.
2. The controller picks the next topology. It picks mesh only if all four PEs announced a
   matrix-multiplication layer (`CC_MATMUL`). Any other class picks C-Mesh: load, reduce,
   reshape, chiplet traffic.
3. If nothing changes, the PEs are released at once.
4. If the topology changes, the controller waits until the whole chiplet network is drained:
   every router and network interface must be empty for `DRAIN_CYCLES` cycles.
5. The controller then flips its region's multiplexers and releases the PEs.

The chiplet also turns the corner-to-corner **express links** on or off. They are on only
when all four regions are in C-Mesh. They are switched at the same drained instant.

- At reset every region is in C-Mesh with the express links on, the setting for loading from
  memory.
- Each switch is counted (`topo_switches`), and so is each cycle spent waiting for the
  drain (`topo_stalls`).

Waiting for a fully drained chiplet is stricter than needed. A finer scheme would switch
each virtual channel as soon as its last buffered flit is a tail flit. That scheme was not
used because the credit counters on both sides of a multiplexer must agree after the switch,
and a drained network guarantees that.

The cost is that every region waits for the slowest traffic in its chiplet. The counterpart
rule for software: **a PE that is waiting at a layer end takes no packets.** Send nothing to
a region between its `OP_LAYER_END` and its release, or the chiplet never drains.

## Using it

The top, `cg_system`, brings out the following:

- every corner router's memory port, per chiplet and corner: `mem_in`/`mem_out` links with
  credits in both directions. Host commands and DRAM data enter here, and responses come out
  here;
- status outputs:
  - the per-region topology and `express_en`;
  - busy PEs;
  - flit counters for the passive, active and express links;
  - topology switch and stall totals.

A flit goes out in the cycle its `valid` is high, on VC `flit.vc`.

- **Sending into the design:** a sender may have at most 4 flits outstanding per VC. Each
  credit pulse returns one.
- **Receiving from the design:** return one credit pulse per flit received.
- **Endpoint example:** `tb/cg_tb_host.sv` is a ready-made endpoint that does both.

Simulate with plain Verilator, for example the 2x2-chiplet end-to-end test:

```
verilator --binary --timing --build-jobs 4 -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/cg_pkg.sv rtl/cg_route_pkg.sv tb/cg_tb_fp_pkg.sv tb/tb_cg_system.sv \
  --top-module tb_cg_system -Mdir obj_sys && obj_sys/Vtb_cg_system
```

Every testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_cg_fp_mul`, `tb_cg_fp_add` | random and corner-case operands against an exactly rounded reference |
| `tb_cg_sram`, `tb_cg_mac_array`, `tb_cg_act_unit` | memory ports; rotated accumulation; every activation function with its cycle count |
| `tb_cg_ni` | flit framing both ways, back-pressure, order per VC |
| `tb_cg_router` | 5-cycle head latency; output port against an independent routing reference (corner NoC router under random region topologies, and a NoP router); ordering; no credit errors |
| `tb_cg_link_mux`, `tb_cg_topo_ctrl` | mux steering; topology choice, drain wait, release |
| `tb_cg_pe` | every command against a reference model, including the matmul cycle count |
| `tb_cg_system` | end-to-end on 2x2 chiplets (below) |
| `tb_cg_system_full` | the same test at the default 4x4 chiplets |

The end-to-end environment `cg_tb_sys_env` runs these layers:

1. **Load** (C-Mesh).
2. **Matmul with neighbour exchange** (mesh).
3. **ReLU, statistics and a pairwise reduction** (regions 0 and 1 in mesh, 2 and 3 in
   C-Mesh).
4. **Transfers** (C-Mesh): to the opposite region over the express links, and to the chiplet
   below, to the right and diagonally, over passive and active links.
5. **Read-back.** Everything is compared with an FP32 reference.

The environment fails if any of the following never happened: a topology switch, a switch
stall, an express reconfiguration, express, passive or active link traffic, a mesh chiplet,
a C-Mesh chiplet, a mixed chiplet.

## Departures and limits

- **External parts not built.** The DRAM and its memory controller are not part of the RTL;
  their links are the `mem_*` ports.
- **Interposer wiring not built.** Micro-bumps and the interposer are not modelled beyond
  wiring.
- **Workload partitioning not built.** Partitioning and allocation of a GAN across chiplets
  is software; the testbench does a trivial version by hand.
- **Normalisation and SoftMax are partial.** The activation unit does not compute division,
  square root or exponentials. A normalisation takes its mean and 1/σ from the command, and
  SoftMax is not supported.
- **Floating point is simplified.** It rounds to nearest even, but subnormals flush to zero
  and there is no NaN handling.
- **Topology switching waits for a fully drained chiplet**, as described above, rather than
  switching per VC.
- **Message-dependent deadlock is possible.** A PE takes no new packet while its own
  outgoing packet waits for the network. If many PEs each queue several `OP_SEND`s to one
  another at once, they can block each other. Software should issue PE-to-PE transfers in
  rounds, as the testbench does (one transfer per PE per round).
- **Fixed VC per destination.** A packet's VC is fixed by its destination. This gives
  ordering, but traffic to a single destination cannot use both VCs.
- **The clock is not verified.** The 2 GHz target has not been checked; there is no timing
  analysis here.
- **Simulation cost.** The design is large: every buffer holds 512-bit flits. Verilator
  takes several minutes to compile a system with chiplets, and simulates a 2x2-chiplet
  system at a few thousand cycles per second.
