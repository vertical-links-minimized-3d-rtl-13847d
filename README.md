# 3D Recursive Network Topology (3D RNT) with Programmable Prefix Arbiters

A three-layer network-on-chip in which only one node in four has vertical
links. A fully vertically connected 4x4x3 mesh needs 32 vertical links; the
recursive topology here needs 8. In exchange, the network inside each layer is
made richer, so that any node can reach any other node in at most six hops.
Each switch schedules its crossbar with a *Programmable Prefix Arbiter* (PPA).
The PPA is a round-robin arbiter built like a carry-lookahead adder: the
priority is the "carry generate" and an idle input "propagates" it.

This repository holds synthesizable SystemVerilog for the whole network:
48 wormhole switches, their routing function, input buffers and arbiters. It
also holds a self-checking testbench for each block.

## Topology

There are three layers (0, 1, 2). Each layer has four clusters (0–3), and
each cluster has four nodes (0–3). A node is named by three digits `xyz`:
layer `x`, cluster `y`, node `z`. Each digit is 2 bits in hardware
(`rnt_pkg::node_id_t`). The linear index used for arrays is `16x + 4y + z`.

The links follow one rule per level:

| Level | Rule | Links per layer |
|---|---|---|
| inside a cluster | every node to every other node (a complete graph of 4) | 4 x 6 = 24 |
| between clusters | node `x a b` to node `x b a`, for every `a != b` | 6 |
| between layers | only cluster heads `x y y`, to `(x±1) y y` | 4 per layer pair |

The inter-cluster rule gives every pair of clusters exactly one direct link,
diagonal pairs included. Inside cluster `a`, node `b` is the gateway to
cluster `b`. Node `y` of cluster `y` has no inter-cluster link, and it is the
**cluster head**: 000, 011, 022, 033 in layer 0, 100, 111, 122, 133 in layer 1,
and so on. Only cluster heads carry vertical links. This makes 30
bidirectional links per layer and 8 vertical links in all.

## Routing

Routing (`rnt_route`) is deterministic and settles the digits of the
destination in order: layer, then cluster, then node.

1. **Layer.** If the destination is in another layer, the packet goes to its
   own cluster's head with one intra-cluster hop. From there it travels
   vertically: UP toward layer 0, DOWN toward layer 2.
2. **Cluster.** If the destination is in another cluster `d`, the packet goes
   to node `d` of the current cluster, the gateway. From there the
   inter-cluster link leads into cluster `d`.
3. **Node.** Inside the destination cluster, one intra-cluster hop reaches the
   destination, because the cluster is fully connected.

The longest path is 6 hops: intra, vertical, vertical, intra, inter, intra.
For example, 231 → 011 goes 231 → 233 → 133 → 033 → 031 → 013 → 011.

**Deadlock.** There are no virtual channels, so wormhole routing on this
topology is not proven free of deadlock. One intra-cluster link can carry a
packet climbing to its cluster head and also a packet on its final hop. Under
heavy all-to-all load, a cycle of waits can form through two layers and two
clusters. The synthetic patterns in the testbench always drain. If you need a
guarantee, add virtual channels separated by routing phase.

## Switch (`rnt_router`)

Every switch has eight ports, numbered in `rnt_pkg`:

| Port | Meaning |
|---|---|
| 0 | LOCAL, the attached module |
| 1..4 | intra-cluster to node `z` = port − 1; the node's own slot is unused |
| 5 | inter-cluster |
| 6 / 7 | UP / DOWN vertical |

An ordinary node wires 5 of the 8 ports. A cluster head in layer 0 or 2 also
wires 5, and a cluster head in layer 1 wires 6. The network ties the unwired
ports off.

The switch has four parts:

- **Input ports.** Each is a 4-flit first-word-fall-through buffer
  (`rnt_fifo`). Four flits on each of five ports gives 20 flits of 10 bytes,
  which is 200 bytes per switch.
- **Route computation.** The head flit at the front of each buffer is routed
  from its destination field.
- **Crossbar scheduler.** Each output has one 8-input PPA. It arbitrates only
  while the output is free.
- **Crossbar.** It multiplexes the bound input's buffer head onto each output.

Switching is wormhole. The arbitration winner binds the output to its input,
and both stay bound until the tail flit has passed. Meanwhile the body flits
stream at one per cycle, and other packets wait in their buffers.

**Timing.** A head flit written into a buffer at clock edge *t* is arbitrated
at edge *t+1*. It is written into the next switch's buffer at edge *t+2*. Each
switch a packet passes through, source and destination included, therefore
adds two cycles to its head. The end-to-end head latency at zero load is
`2 × (hops + 1)` cycles from the injection edge to the ejection edge.

**Links** are valid/ready pairs, one per direction. `ready` means "buffer not
full" and does not depend on `valid`, so no combinational path runs from one
switch to the next.

## Programmable Prefix Arbiter (`ppa_prefix`, `ppa_arbiter`)

In a carry-lookahead adder, `c[i] = g[i] | (p[i] & c[i-1])`. The arbiter
substitutes the priority bit for `g` and an *absent* request at the previous
input for `p`:

```
x[i]   = prio[i] | (~req[i-1] & x[i-1])      (indices modulo N)
gnt[i] = req[i] & x[i]
```

`x[i]`, the priority-transfer signal, is high at the input that holds the
priority. It passes on to the next input for as long as the inputs it passes
do not request. The first requester it reaches is granted. For two inputs
this is the whole circuit, two gates per side:

```
x1 = p1 | (~r0 & p0)      x0 = p0 | (~r1 & p1)
```

For `N` inputs the recurrence is a ring, so it has no natural start. To break
it, `ppa_prefix` unrolls the ring twice (2N positions) and evaluates it as a
Kogge-Stone parallel prefix, with combine operator
`(g,t)∘(g',t') = (g | t&g', t&t')`. It reads `x[i]` at position `N+i`.
The logic depth is `log2(2N)` combine levels.

`ppa_arbiter` adds the priority state. The state is a binary pointer of
`log2(N)` flip-flops, decoded to the one-hot `prio`. When `update` is high and
a grant is issued, the pointer moves to the input just after the winner.
This gives round-robin service: every requester is granted within `N`
grants. `prio_load`/`prio_in` program the pointer directly. `active` gates
the issued grant `grt`; `grt_pr` is the raw prefix-network grant. In the
switch, `active` means "this output is free" and `update` is tied high.

## Flit format

`rnt_pkg::flit_t` is 82 bits:

| Field | Meaning |
|---|---|
| `head` | first flit of a packet |
| `tail` | last flit of a packet |
| `data[79:0]` | 10-byte payload |

A single-flit packet has both `head` and `tail` set. In a head flit,
`data[5:0]` is the destination ID (`{layer, cluster, node}`), and the switches
read nothing else. The testbenches put the source in `data[11:6]`; the
hardware ignores it.

## Top level (`rnt_noc`)

`rnt_noc` instantiates 48 `rnt_router`s and wires every link by the rules
above. The wiring functions are `neighbour` and `back_port` in `rnt_pkg`. The
modules attached to the nodes are not part of this design. Each node's local
port is brought out as arrays indexed by the linear node index:

- `inj_flit/inj_valid/inj_ready`: from the module into the network
- `ej_flit/ej_valid/ej_ready`: from the network to the module

Reset is synchronous and active high. The only parameter is `BUF_DEPTH`
(default 4), the number of flits per input buffer.

Synthesis of the whole network gives about 113k word-level cells, 3,280
flip-flop bits and 83k memory bits (the input buffers).

## How far to trust it, and where it departs

These parts are taken as described:

- the topology
- the three-step routing order; all nine interlayer example paths are checked
  hop by hop
- the two-bit PPA circuit
- the arbiter's flip-flop count: log2(N)
- the four-part switch structure
- wormhole switching
- the 10-byte flit
- 200 bytes of buffering per switch

These are this design's own choices:

- the port numbering
- the valid/ready handshake
- the two-cycle switch pipeline
- the head/tail sideband
- the split of the 200 bytes into 4 flits per input
- the Kogge-Stone evaluation of the wider arbiters
- the round-robin pointer update rule, and the meaning of `active`, `update`
  and the programming port

Known gaps and differences:

- **Direction of priority transfer.** The arbiter passes priority from input
  `i-1` to input `i`, following the adder recurrence. A different description
  of the 16-port arbiter passes it from input 16 to input 15. The two agree
  for two inputs and are mirror images otherwise.
- **No virtual channels.** See *Deadlock* above.
- **Link bandwidth.** One 80-bit flit per cycle is 20 Gbps at 250 MHz.
  Injection rates of 100 Gbps per source therefore need a faster clock or
  wider links.
- **Link delay.** Links are plain wires with no modelled delay.
- **Not covered:** the floorplanning and network-calculus analyses.

## Verification

Each testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line:

| Testbench | What it checks |
|---|---|
| `tb_ppa_prefix` | exhaustive two-bit check against the gate equations; 16-input check against a ring search |
| `tb_ppa_arbiter` | reset, `active` gating, programming, the pointer update against a model, fairness over 16 grants |
| `tb_rnt_fifo` | random push/pop against a queue, full and empty reached |
| `tb_rnt_route` | all 48x48 pairs walked over an independent model of the links (every port wired, ≤6 hops, layer→cluster→node order); the nine interlayer paths node by node |
| `tb_rnt_router` | node 111 with all wired inputs loaded and random back-pressure: output choice, wormhole contiguity, per-input order, a 2-cycle zero-load latency, contention and full buffers seen |
| `tb_rnt_noc` | the full 48-node network at default parameters, described below |

`tb_rnt_noc` runs in two phases:

1. The zero-load latency of the nine interlayer flows, which must be
   `2 × (hops + 1)`.
2. The five synthetic patterns (nearest-neighbour, hot-spot, digit-reversal,
   transpose, interlayer). Each has nine flows of 8 five-flit packets, with
   sink back-pressure. The test checks the destination, packet contiguity and
   per-flow order, and that every packet arrives.

Phase 2 also counts contention, full-buffer stalls, and vertical,
inter-cluster and intra-cluster link use. Each must occur at least once.

## Simulating

Using Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rnt_pkg.sv tb/tb_rnt_route.sv --top-module tb_rnt_route -o sim
./obj_dir/sim
```

Replace `tb_rnt_route` with any testbench name. The network testbench
`tb_rnt_noc` simulates in under a second. Its C++ build is long, though:
about 15 minutes on one core, because each of the 48 switches is elaborated
separately. Add `-j 0` to build in parallel.

## Files

| File | Contents |
|---|---|
| `rtl/rnt_pkg.sv` | sizes, IDs, `flit_t`, port numbers, wiring functions |
| `rtl/rnt_noc.sv` | the 48-node network (top) |
| `rtl/rnt_router.sv` | one switch |
| `rtl/rnt_route.sv` | routing function |
| `rtl/rnt_fifo.sv` | input buffer |
| `rtl/ppa_arbiter.sv` | PPA with its priority pointer |
| `rtl/ppa_prefix.sv` | PPA prefix network |
| `tb/tb_*.sv` | one self-checking testbench per module |
