# Accelerating on-chip communication: pseudo-circuits, early transition and optical handshakes

This RTL implements three independent techniques for cutting latency and raising throughput in
on-chip networks. All three are built in synthesizable SystemVerilog and sit side by side in
one top module, `noc_accel_top`:

1. **Pseudo-circuit router.** This is the largest part. A two-stage virtual-channel router
   remembers the input-to-output crossbar connection that the last flit on each input used.
   A later flit that wants the same connection skips VC and switch allocation entirely. With
   buffer bypassing it also skips the buffer write. A flow that repeats itself therefore
   crosses a router in 1 cycle instead of 3. Sixteen such routers form a 4x4 concentrated mesh
   (4 nodes per router, 64 nodes).
2. **Early transition to escape channels.** This is the route and VC selection unit of a fully
   adaptive router that uses Duato-style escape VCs. Normally a packet enters the deadlock-free
   escape VCs only when every adaptive VC is full. Here it moves as soon as the escape VC is
   less occupied than the best adaptive VC, which keeps the escape VCs from idling.
3. **Handshakes for a nanophotonic crossbar.** Each node owns one optical data channel that all
   other nodes may write: multiple writers, single reader (MWSR). Senders win the channel with
   optical tokens. There is no credit flow control. Instead, the receiving ("home") node answers
   each flit with a 1-bit ACK or NACK one ring round trip later. Two variants are built:
   - **Global handshake (GHS):** a single token circulates.
   - **Distributed handshake (DHS):** the home node emits a fresh token every cycle.

   Both variants come with the two cures for head-of-line blocking: setaside buffers at the
   sender, and circulation of the flit at the home node.

## 1. Pseudo-circuit router (`pc_router`, `pc_unit`, `pc_mesh`)

### Baseline pipeline
Each of the 8 ports (N, E, S, W and 4 local) has 4 VCs with 4-flit FIFOs (`vc_buffer`), and links
are 128 bits wide. Routing is lookahead XY: every flit carries in its `route` field the output
port it will take in the router it is entering. The router computes the port for the next hop
while the flit crosses the switch (`noc_pkg::lookahead_route`). Flow control is credit based and
wormhole.

A head flit goes through three stages:
- **cycle 1, BW:** the flit is written into its input VC;
- **cycle 2, VA+SA:** VC allocation (`vc_alloc`) and switch allocation (`sw_alloc`, separable,
  input-first, round-robin) happen in the same cycle;
- **cycle 3, ST:** the flit crosses the crossbar (`crossbar`) into the registered output.

So latency is 3 cycles per hop when the network is empty. Body flits use the VC held by their
head.

### Pseudo-circuits
`pc_unit` holds one register per input port. The register stores a valid bit, the input VC and
the output port of the last switch grant at that input. A flit arriving on that VC with that
output port **matches**. A matching flit goes straight from its buffer to switch traversal: it
takes 2 cycles instead of 3 and causes no arbitration.

Three rules govern when the circuit is used:
- **Priority to waiting flits.** The circuit is used only when no other input requests the same
  output in the same cycle, so flits that are already arbitrating win over the circuit.
- **Termination on conflict.** The circuit ends when another input is granted its output, or
  when a flit at its own input wants a different output.
- **Termination on congestion.** The circuit ends when the downstream VC it feeds has no credit.

Termination clears only the valid bit. The VC and port fields stay in the register.

### Speculation
Every output port keeps a one-entry history: the input whose circuit to this output ended most
recently. The circuit is restored, and its valid bit set again without any flit, when all of the
following hold:
- the output has no circuit and no switch grant this cycle;
- the output has credit;
- that input has no valid circuit of its own.

A flow that was interrupted by one conflicting packet therefore gets its circuit back.

### Buffer bypassing
If the input VC of a circuit is empty and a matching flit arrives, the flit is not written into
the buffer. It goes directly to the crossbar in the cycle it arrives, so one hop takes **1 cycle**.

### VC allocation
The router defaults to **static VA**: the output VC is a function of the destination,
`dst.x ^ dst.y ^ dst.loc`. A flow therefore always uses the same VC, and its circuits keep
matching. Setting `STATIC_VA = 0` selects dynamic VA instead, which takes the free VC with the
most credits.

### Parameters and events
`EN_PC`, `EN_SPEC` and `EN_BYPASS` switch the three mechanisms off one by one. With all three off
the module is the baseline router.

The router reports one event pulse per input:
- `ev_sa_grant`
- `ev_pc_reuse`
- `ev_bypass`
- `ev_spec`
- `ev_term_conflict`
- `ev_term_congest`

Timing per hop, verified by `tb_pc_router`: baseline 3 cycles, pseudo-circuit 2, bypass 1.

### Mesh
`pc_mesh` wires 16 routers into a 4x4 mesh:
- router number = `y*4 + x`;
- node number = `router*4 + local port`;
- N goes towards smaller y.

Mesh ports at the edge are tied off. Each node gets a flit input with a credit return and a flit
output that takes credits back. The network interface must:
- put `xy_route(x, y, dst)` of the source router into the `route` field of a head flit;
- keep one VC for the whole packet.

## 2. Early transition (`et_route_select`)
The 4 VCs of each port are split:
- VC0 and VC1 are **normal** VCs, used with minimal fully adaptive routing;
- VC2 and VC3 are **escape** VCs, and they form the two O1TURN virtual networks: VC2 routes XY
  and VC3 routes YX.

For a packet in the normal VCs, the unit takes the productive port and normal VC with the most
credits. It then compares two occupancies:
- the occupancy of that VC, computed as `BUF_DEPTH - credits`;
- the occupancy of the best escape VC of a randomly chosen escape network. An 8-bit LFSR makes
  the random choice.

If the escape VC is **strictly** less occupied, the packet moves to the escape VCs. The `early`
output is set when the normal VCs were not full at that moment. When the normal VCs are full,
the rule reduces to Duato's, so deadlock freedom is kept.

Once in an escape network, a packet stays in it until it reaches its destination. At the
destination router the unit selects the local port with the most credits.

The logic is combinational apart from the LFSR. It is meant to feed the VA stage of a router, and
the router around it is the same pipeline as above.

## 3. Optical handshake network (`hs_sender`, `hs_home`, `hs_channel`, `hs_network`)

### Channel model
`hs_channel` is one MWSR channel of a 64-node crossbar. The ring round trip is 8 cycles, so the
ring is modelled as 8 register segments, one cycle each. Each segment carries three waveguides:
data, token and handshake. A node at ring position `p` sits in segment `p*8/64`. Within one
cycle, a segment resolves all of its nodes in ring order.

The sender and the home node behave as follows:
- A sender with a flit takes a token passing its position and writes the flit onto the data
  waveguide in the next cycle.
- The home node reads the flit at the end of the ring.
- For GHS and DHS, the home node answers in the following cycle on the handshake waveguide. The
  answer reaches the sender **9 cycles** after the send: 8 cycles of round trip plus 1.

The answer carries no identifier. The sender pairs it with the flit through a 9-entry delay line
of the slots it sent from.

### Modes
The mode is set with `MODE`.

| mode | tokens | full home buffer | sender after a NACK |
|---|---|---|---|
| `HS_GHS` | one token, emitted once after reset; a node keeps it while it has flits | drop + NACK | retransmits |
| `HS_DHS` | a new token from the home node every cycle | drop + NACK | retransmits |
| `HS_DHS_CIRC` | every cycle, except when the home node re-injects | flit re-injected next cycle, never dropped | - (no handshake) |

Set `SETASIDE > 0` in GHS and DHS to avoid head-of-line blocking. A sent flit then moves into a
setaside slot while it waits for its answer, and the next flit may go. NACKed slots are
retransmitted first. With `SETASIDE = 0` the queue head waits for its ACK.

### Network
`hs_network` builds one channel per destination. It demultiplexes each node's injection by
destination and collects events per node.

## Top level
`noc_accel_top` places the three designs side by side with separate port groups:
- `m_*`: the mesh;
- `et_*`: the route selection unit, placed at router (1,1);
- `h_*`: the optical network.

The defaults are the sizes above: a 64-node mesh and a 64-node optical network in DHS with
circulation.

## Where this design departs from, or adds to, the source description
Each file's header comment separates the parts that follow the source description from this
design's own choices. Two rules follow it closely even though they are easy to mistake for own choices:
- a circuit is used only when no flit in switch allocation claims its input or output;
- termination clears just the valid bit.

The main own choices are:
- the static VC function;
- allocator organisation;
- the 256-bit optical flit;
- a 4-slot home buffer, a 2-deep sender queue and 2 setaside slots;
- a 1-cycle answer at the home node;
- the LFSR for O1TURN.

In one place the RTL differs from the source description. There, a bypassing flit is also
written into a write-through buffer, and the write pointer is not advanced. Here the bypassing
flit is simply not written. The behaviour is the same.

Some parts are not built:
- **Optical devices.** The laser, waveguides, micro-ring modulators and detectors are modelled
  only as registered ring segments.
- **Token fairness.** The fairness extension for the token protocols is referenced but not
  defined in the source description.
- **Processors, caches and packetisation.** These are outside the network.
- **A complete adaptive router.** The early-transition unit is a route and VC selection block;
  it is not built into a second, adaptive router.

## Verification
Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_vc_buffer`, `tb_crossbar`, `tb_vc_alloc`, `tb_sw_alloc`, `tb_pc_unit` | reference models, random and directed |
| `tb_pc_router` | per-hop latency 3/2/1, payload, static VC, lookahead route, credit totals, each termination cause, speculative restore |
| `tb_pc_mesh` | full 64-node mesh, 1536 random packets of 1-5 flits: delivery once, in order, intact; all pseudo-circuit events occur |
| `tb_et_route_select` | directed cases and 2000 random decisions against the transition rule |
| `tb_hs_sender` | flit life cycle under random ACK/NACK at a 9-cycle delay |
| `tb_hs_home` | queue model, answer bit, drop/re-injection, token rules |
| `tb_hs_channel` | all three modes on an 8-node ring: every flit delivered once, drops equal retransmissions |
| `tb_hs_network` | 8-node crossbar, random destinations |
| `tb_noc_accel_top` | end to end: mesh traffic, early-transition decisions and optical traffic (8 nodes, DHS with circulation) in one run; counts every mechanism and fails if one never occurs; drops and retransmissions of the other modes are covered by `tb_hs_channel` and `tb_hs_network` |

Sizes simulated:
- **Mesh:** simulated at full size.
- **Optical network:** simulated with 8 nodes. The 64-node default compiles but was not
  simulated.
- **Full-default top:** there is no testbench for the top at its full defaults. The largest
  simulated configuration is the 64-node mesh with the 8-node optical network.

To run a testbench with plain Verilator:

```
verilator --binary --timing -y rtl -y tb +libext+.sv -Irtl rtl/noc_pkg.sv rtl/hs_pkg.sv tb/tb_pc_router.sv --top-module tb_pc_router -o sim
./obj_dir/sim
```

The mesh-sized testbenches take several minutes to compile.
