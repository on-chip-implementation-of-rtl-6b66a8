# TPBR router controller: deadlock-free routing tables built in hardware

In a wormhole network a packet holds on to every channel it has crossed until
its tail passes. If packets wait on each other's channels in a cycle, none of
them can move again: the network is deadlocked. In a regular mesh, fixed turn
rules (for example "no turn after going north") break every such cycle. An
irregular network of workstations has no grid to hang such rules on.

**Turn Prohibition Based Routing (TPBR)** handles irregular graphs. Visit the
nodes one at a time, lowest degree first. At each node, prohibit just enough
of the turns (input link → output link) through it that no cycle of channel
dependencies can close there. Then remove the node from the graph. What is
left is a set of permitted turns with no dependency cycle. Over those turns,
every node builds a shortest-path routing table.

This RTL implements the whole procedure as one controller chip, `tpbr_chip`,
in every 4-port router. There is no central computer. The chips cooperate
only by exchanging small control packets through the routers' port buffers.
At the end, each chip holds:

- its turn matrix `P`;
- a routing table `R`: the output port to use, by input port and destination;
- a distance table `D`: the path length, by input port and destination.

## The chip at a glance

```
              int_req[3:0] ──► intr_unit ──► rx_unit ──► dispatch by packet type
 port-buffer                                             │      │      │
    bus     ◄──► bus_arbiter ◄──────────────────────┐    ▼      ▼      ▼
 (addr, dout,                                        │ token  prohibit route
  din, rw,                                           │ _unit  _unit    _unit
  cs_n[3:0])                                         │   │      │      │
                                                     └─ tx_unit ◄─ select (prohibit > route > token)
```

Three protocol phases run one after another. Each phase starts when the
previous one reports done.

| Phase | Unit | Result |
|---|---|---|
| 1. Degree claim | `token_unit` | degree of every node; this node's `order` (rank) |
| 2. Turn prohibition | `prohibit_unit` | `P` (5×5), `special` flag, `P` written to memory |
| 3. Table construction | `route_unit` | `R` and `D`, 5 rows × `NUM_NODES` columns, 8-bit entries |

Rows and columns of `P`, `R` and `D` follow one convention:

- index 0 is the local CPU (injection and consumption);
- index k = 1..4 is router port k-1.

All three phases share:

- one receive path: the interrupt unit, then the receive unit, then a dispatch
  by packet type;
- one transmit path: a fixed-priority select, then the transmit unit.

The two paths share the bus to the port buffers through `bus_arbiter`.

## Control packets

Every control packet is 16 bytes, moved as eight 16-bit words. Word `w` is
bits `[127-16w -: 16]` of the `pkt_t` struct in `tpbr_pkg.sv`.

| Byte | Field | Use |
|---|---|---|
| 15 | `src` | node that started the packet |
| 14 | `hop` | node that sent this copy |
| 13 | `dest` | destination node, or `0xFF` for all |
| 12 | `ptype` | 1 degree, 2 probe, 3 token release, 4 special, 5 table |
| 11 | `sub` | probe: port it first left on; table: which port's vector |
| 10 | `counter` | degree: number of claimed slots; release: new token value; table: step t |
| 9..2 | `data` | 64-bit payload |
| 1 | `time_left` | set to `0x20`; a packet that arrives with 0 is dropped |
| 0 | `crc` | XOR of bytes 15..1; filled in by the transmit unit, checked on receive |

The receive unit drops a packet with a bad `crc` or no time left, and pulses
`crc_drop` or `ttl_drop` when it does.

## Port-buffer bus and interrupts

The chip treats each router port as a small buffer on a shared 16-bit bus.
`bus_cs_n[p]` (active low) selects port `p`, and `bus_addr` is the word index
0..7.

**Receive.**

1. A buffer holding a packet keeps `int_req[p]` high.
2. `intr_unit` picks the lowest requesting port (port 0 has the highest
   priority) and passes the port number to `rx_unit`.
3. `rx_unit` takes the bus and reads the eight words, two cycles each: the
   address goes out on one cycle, and `bus_din` is sampled on the next.
4. It checks the packet and hands it on. It pulses `rx_ack`.
5. `intr_unit` then pulses `int_ack[p]` for one cycle, which pops the buffer.
6. After one idle cycle, `intr_unit` serves the next request.

From interrupt to a checked packet takes 19 cycles when the bus is free.

**Transmit.**

- `tx_unit` writes the eight words with `bus_rw=1`, one word per cycle, to
  each port in its port mask, lowest port first.
- Writing word 7 sends the packet out of that port.
- `pkt_sent` pulses once per copy sent.

**Arbitration.** `bus_arbiter` grants the bus to one unit at a time:

- a unit keeps the bus until it drops its request;
- when both units ask at once, the grant alternates between them;
- after reset the receive side goes first.

## Phase 1: degree claim and ranking

Every node needs the degree of every node, because TPBR visits nodes in order
of degree. The degree packet has one 4-bit slot per node in its data field.

- The slot of node `n` is `data[63-4n -: 4]`.
- Each slot holds `{R, W, degree-1}`.

Node 0 starts by sending a packet with its own slot written (`W=1`). Every other
node waits. When a node receives a degree packet, it:

1. ORs the slots into its own copy;
2. claims its own slot if it has not yet;
3. sets its `R` bit once all `NUM_NODES` slots are claimed;
4. re-sends its copy on all its ports, but only if the copy changed.

A packet that brings nothing new is dropped (`deg_drop`), so the flood dies
out. After the flood every node holds the same full table.

Each node ranks itself by degree, breaking ties by node id. The rank is
output as `order`, and it is the token value at which the node will run
phase 2.

## Phase 2: turn prohibition

This phase carries the deadlock argument, and it is the hardest part of the
chip to follow.

### The token

A token value, starting at 0, passes through the network. The node whose
`order` equals the token runs the prohibition step. When it has finished, it
floods a **release** packet carrying token+1:

- every node forwards a release only if it raises its own token value;
- a node that receives a release directly from the node that has just run
  marks that port as leading to a **processed** neighbour.

Nodes that have run count as removed from the graph.

### Finding components without this node

The running node must know which of its neighbours can still reach each other
without passing through it. To find out:

1. It sends a **probe** out of every port that leads to an unprocessed
   neighbour. The probe's `sub` field records the port it left on.
2. Unprocessed nodes forward each probe once, on all their other ports.
   Duplicates are dropped.
3. Processed nodes drop probes.
4. A probe that comes back in on port `j` after leaving on port `i` proves that
   the neighbours on `i` and `j` are connected without this node.

The node then waits for a quiet period of `TIMEOUT_IO_OPS × IO_OP_CYCLES`
cycles (6 × 256 by default). Every returning probe restarts the wait. When the
wait ends, the node takes the transitive closure of the port-to-port links it
found. The result is its **components of connectivity**.

### The turn rule

The lowest port of each component is that component's **tree edge**. For ports
`i` and `j`, both greater than 0:

| Case | P(i,j) |
|---|---|
| `i == j` (U-turn) | 0 |
| either port unconnected | 0 |
| either port leads to a processed neighbour | 1 |
| both lead to unprocessed neighbours | 1 only if both are tree edges, i.e. they lie in different components |

`P(0,k) = P(k,0) = 1` for every k.

Why this is deadlock free. Two neighbours in the same component can already
reach each other without this node. So a turn between them through this node
could only close a cycle, and it is prohibited. Keeping exactly one port per
component keeps the remaining graph connected through this node.

### Special nodes

When removing the node splits the rest of the graph into more than one
component, the node sends a **special** packet out of each tree-edge port.

A node that receives one marks itself `special`. When its own turn comes, it
does not mark further special nodes. It still probes and applies the turn
rule above, and then releases the token.

The literal reading is different: a special node would permit all of its
turns instead of running the algorithm. That reading is not deadlock free.
Take links 0-1, 0-2, 0-3, 1-5, 2-3, 2-4, 3-4, 5-6:

1. Node 1 runs early and makes node 0 special.
2. Node 0 is then the first node of the triangle 0-2-3 to run.
3. If node 0 permitted the turn 2-0-3, the triangle would keep a cycle of
   channel dependencies.

A reference model of this rule, run on 4000 random graphs of 4 to 16 nodes,
found such cycles in 69 of them with the literal reading and in none with the
rule as built. `tb_tpbr_special7` runs that 7-node network.

### Memory write

When its step is finished, the node writes `P` for the four network ports to
external memory as one 16-bit word:

- `mem_addr = 1`;
- bit `15-4i-j` holds `P(i+1, j+1)`.

It also drives `p_mat`. When the token reaches `NUM_NODES`, every node has
run, and `all_prohibit_done` rises.

## Phase 3: routing tables under the turn matrix

The tables start at 255 ("undetermined"), except `D(i,a) = R(i,a) = 0` for the
node's own id `a`. Each step t has three parts:

1. **Send.** On each connected port `y`, send a table packet whose data is a
   16-bit vector `T_y`. Bit `k` of `T_y` is 1 when `D(y+1,k) = t-1`, that is,
   when a message entering this node on that port reaches `k` in t-1 hops.
2. **Collect.** Wait until the step-t vector has arrived from every connected
   port. A neighbour can be at most one step ahead, so vectors are stored in
   two banks selected by the parity of t.
3. **Update.** For each destination `k` and each input `i` with `R(i,k)`
   still undetermined, take the lowest port `m` that meets both conditions:
   - `P(i,m) = 1`;
   - the neighbour on `m` sent `T(k) = 1`.

   Then set `R(i,k) = m` and `D(i,k) = t`. An entry is written once only,
   so the first write is a shortest permitted path.

Because the neighbour reports the distance *as seen from the input it would
receive on*, each hop of a path obeys that neighbour's turn matrix. Every
path in the tables therefore uses only permitted turns.

The unit stops after `MAX_STEPS = NUM_NODES-1` steps, which is the longest a
shortest path can be. The CPU reads entries through `tbl_row` / `tbl_col`,
which return `tbl_r` and `tbl_d` combinationally.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_NODES` | 16 | number of nodes in the network; also the table width and the number of degree slots. It must equal the actual node count, because phase 1 ends when all slots are claimed |
| `TIMEOUT_IO_OPS` | 6 | quiet period of the probe phase, in I/O operations |
| `IO_OP_CYCLES` | 256 | clock cycles counted as one I/O operation |
| `MAX_STEPS` | `NUM_NODES-1` | number of table-construction steps |

The package `tpbr_pkg` fixes four ports, 5×5 `P`, 16-byte packets and a 4-bit
node id, so at most 16 nodes.

## Verification

Each unit has a self-checking testbench. Every testbench prints
`TB_RESULT checks=.. failures=..` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_intr_unit` | priority, one-cycle `int_ack` only after `rx_ack`, latency |
| `tb_bus_arbiter` | first grant, hold, alternation, bus drive |
| `tb_rx_unit` | word assembly, 19-cycle latency, crc and time-left drops, hold until taken |
| `tb_tx_unit` | crc fill-in, port order, word count, 19 cycles for two copies |
| `tb_token_unit` | node 0 start, merge, drop of stale copies, R bit, ranking including ties |
| `tb_prohibit_unit` | probes, components, length of the 6-I/O-operation quiet time, tree edges, `P`, memory word, special packet, release |
| `tb_route_unit` | T vectors per step, waiting for all ports, `R`/`D` against hand-worked values |

`tb_net_harness` builds a whole network:

- one chip per router;
- four port buffers per chip, each a FIFO of depth 64;
- in-order links between the buffers.

It runs the full protocol and then checks every chip against a reference it
computes on the whole graph:

- ranks and degrees;
- a central run of the turn rule, giving `P`, special nodes and the memory word;
- `R` and `D` by relaxation over permitted turns;
- that every pair of nodes is reachable;
- that the channel dependency graph of the permitted turns has no cycle, which
  is the deadlock-freedom property itself;
- for the mesh and the 10-node network, that at least as many turns are
  prohibited as the known lower bound for any deadlock-free turn set
  requires: 9 of 52 for the 4×4 mesh, 8 of 44 for the 10-node network.

It also injects one bad-crc packet and one packet with no time left. It counts
every mechanism the chip reports on its `events` port and fails any that never
happened.

| Testbench | Network | Checks | Cycles |
|---|---|---|---|
| `tb_tpbr_chip` | 7 nodes: two triangles joined through a cut node, so the special-node path is exercised | 562 | 12622 |
| `tb_tpbr_special7` | 7 nodes: special nodes next to a triangle (the case above) | 562 | 12889 |
| `tb_tpbr_ring10` | 10 nodes, 17 links, 44 turns: a ring with seven chords; 10 turns end up prohibited | 1006 | 20274 |
| `tb_tpbr_full` | 4×4 mesh with the chip at its default parameters; 9 of 52 turns prohibited, exactly the lower bound | 2272 | 32344 |

## Simulating with Verilator

All code is plain SystemVerilog. Use Verilator 5 with `--timing`, and give the
package first:

```
verilator --binary --timing -y rtl -y tb rtl/tpbr_pkg.sv tb/tb_tpbr_chip.sv \
          --top-module tb_tpbr_chip -Mdir obj_chip
obj_chip/Vtb_tpbr_chip +verilator+rand+reset+2
```

Replace `tb_tpbr_chip` with any other testbench name to run that test.

- The unit testbenches build in seconds.
- `tb_tpbr_full` takes a minute or two to build, and runs in under a second.
- `+verilator+rand+reset+2` starts all state at random values, so a test also
  shows that reset covers everything the design reads.

## Where this design departs from the document it is based on

- **Ranking.** Nodes are ranked by degree, with ties broken by node id. The
  document also mentions minimising `(d_a²-2)/Σ(d_i-1)` over neighbour
  degrees; that metric is not used.
- **Degree packet.** The degree packet is merged and re-flooded, not passed
  around as a single packet. The 2-bit degree field stores degree-1, so that
  degree 4 fits.
- **Type-0 packet.** The "type 0" packet of the token unit's state diagram is
  not implemented, because its contents are not defined.
- **U-turns.** U-turns are prohibited (`P(i,i)=0`). The document also says
  data may be routed back out of the port it came in on. A U-turn never
  shortens a minimal path, so the tables are the same either way.
- **Table update.** The update follows the formal rule: write entry (i,k) from
  the first permitted port m whose neighbour reported k at t-1. The
  step-by-step text that updates `D(Pr,k)` for the receive port is not
  followed.
- **Termination.** Table construction always runs `NUM_NODES-1` steps. There
  is no early stop on "no change", which would need a network-wide signal.
- **Port-buffer data bus.** The bus is split into `bus_dout` and `bus_din`.
  The packet layout, the bus timing, the interrupt handshake, the port
  priority, the crc (XOR) and the time-left rule are all choices of this
  design.
- **P-matrix memory word.** The word at address 1 and its bit order are
  choices of this design.
- **Special nodes.** A special node still applies the turn rule; it does not
  permit all its turns (see *Special nodes* above).
- **Timeout and tree edges.** One I/O operation is taken as 256 cycles. The
  timeout restarts on each returning probe. The tree edge is the lowest port
  of each component.
- **Network size.** At most 16 nodes. The document's larger example
  (1000 nodes) does not fit. `NUM_NODES` must be set to the exact node count.
- **Physical design.** The host CPU, the network interface cards, the P-matrix
  memory and the physical chip design are outside this RTL. The testbench
  models the port buffers.
