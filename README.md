# Fault-tolerant test delivery for a mesh network-on-chip

A chip built around an on-chip network can be tested by reusing the network
itself: the tester feeds one router, and test packets travel through the
mesh to every router and core that needs them. The catch is that some links
and routers may be defective, and a test packet that crosses a defective
part arrives corrupted. This RTL implements the on-chip half of a test flow
that avoids this. The flow tests the chip in three stages, each relying only
on what the previous stage showed to be good:

1. **Links.** Every router runs a link self-test on its links at the same
   time. The result is a map of faulty links.
2. **Routers, in sessions.** A session tests routers of one kind together
   (routers with the same number of ports are identical, so they share a
   test set). Test packets travel only through routers and links already
   proven good. They are spread over a set of such good routers, and each of
   those hands its copy to one router under test, normally a neighbour. No
   test packet ever crosses a router that is still under test.
3. **Cores, class by class.** All identical cores (one *class*) are tested in
   one session. Test packets are multicast to every core of the class over
   whatever routers and links are still working.

Responses are never sent back per pattern. Every router and core compacts
its scan-out data in a MISR, and the tester collects one signature from each
unit at the end of a session.

The tester's side is software and is not here: choosing sessions, choosing
the serving routers, and ordering destinations. So are the routers' switching
and routing, and the cores themselves. This repository holds everything that
sits in each mesh node to support the flow.

## Multicast by halving a chain

The network only knows unicast: one packet, one destination. A multicast to
N destinations is therefore built from rounds of unicasts. In each round,
every node that already holds the packet sends one copy onward, so the
number of holders roughly doubles per round.

The destinations are first sorted into a *dimension-ordered chain*: by x
coordinate, then by y. The tester sends the packet to one member of the
chain, together with the whole chain. A node that holds the packet is
responsible for a contiguous part of the chain that contains itself. While
that part has more than one member, the node does the following:

* It splits the part into two halves.
* It sends one copy to the member of the *other* half that lies next to it
  in the chain. That is the first member of the upper half if the node is
  in the lower half, or the last member of the lower half otherwise. The
  copy carries only the other half of the chain.
* It keeps its own half and repeats in the next round.

The receiver does exactly the same with the half it was given. After
ceil(log2 N) rounds every member has the packet. Counting the tester's own
first unicast, that is log2 N + 1 unicast steps.

Sorting the chain keeps the unicasts of one round in separate regions of
the mesh, so they compete little for links.

Worked example: eight cores of one class, sorted as

    (0,1) (2,3) (2,6) (4,4) (5,2) (5,6) (7,1) (7,5)
     c0    c1    c2    c3    c4    c5    c6    c7

| step | unicasts (sender → receiver, part handed over) |
|------|-----------------------------------------------|
| 1 | tester → c4, whole chain |
| 2 | c4 → c3, {c0..c3} |
| 3 | c3 → c1, {c0,c1}; c4 → c6, {c6,c7} |
| 4 | c1 → c0; c3 → c2; c4 → c5; c6 → c7 |

**Odd parts.** When a part has an odd size, the halves cannot be equal. The
receiving side takes the larger half and the sender keeps the smaller one.
With six routers and the packet starting at the fourth, this gives
4→3, then 3→2 and 4→5, then 2→1 and 5→6: three rounds. If the sender is the
exact middle of an odd part, it joins the lower half. `rtl/mcast_split.sv`
holds this rule as combinational logic.

**Router sessions** add one more step. The chain lists the *serving*
routers, the good ones chosen for the session. Each chain entry also names
the router under test that the serving router is responsible for. When a
serving router has finished its multicast duty, it sends its copy on to
that router (packet type `PT_RT_FINAL`). The router under test takes it from
the input port named by its `tport` pin. With six serving routers this is
five unicast steps in all: the tester's step, three rounds, then the last
step.

**Pipelining.** A node only forwards and applies packets; it never waits for
the rest of the tree. The tester can therefore inject the next packet while
earlier ones are still spreading. The node that receives every packet first
becomes the bottleneck. When it falls behind, its three-packet consumption
buffer fills and back-pressures the network.

## Packet format (`rtl/noctest_pkg.sv`)

Flits are 32 bits wide, plus `head` and `tail` framing bits. A node address
is `{x[3:0], y[3:0]}`, so comparing addresses as integers gives the
dimension order directly. Meshes up to 16×16 fit.

| flit | contents |
|------|----------|
| header | `[31:29]` type, `[28:21]` destination, `[20:13]` chain length, `[12:5]` source |
| chain, ceil(n/2) flits | two 16-bit entries each: `{router under test, node}` |
| payload | scan data; bit i of a flit goes to scan input i |

Packet types:

| type | meaning |
|------|---------|
| `PT_OPER` | ordinary traffic |
| `PT_CORE_TEST` | core test packet, multicast |
| `PT_RT_MCAST` | router test packet, multicast among the serving routers |
| `PT_RT_FINAL` | router test packet, last hop into the router under test |
| `PT_RESP` | a signature going back to the tester |

The header layout and the entry format are choices of this implementation.

## What one node contains (`rtl/noctest_node.sv`)

```
 network ──► consumption buffer ──► mcast_node_ctrl ──► core_dft ──► processor
                (3 packets)             │   copies          │ scan trees, MISR
                                        ▼                   ▼ (pin e)
 network ◄── injection buffer ◄── packet arbiter ◄── router_dft ◄── processor packets
                (3 packets)                              ▲ (pin e)
 links  ──► link_bist / router_dft input demultiplexers ──► switch (external)
```

**`mcast_node_ctrl`** is the busiest block in a node:

* It reads a test packet into a local store: header, chain and up to
  `MAX_PAY` payload flits. This frees the consumption buffer.
* It finds its own position in the chain by comparing addresses.
* It sends one copy per round, as described above. Each copy is a new
  header, the handed-over chain entries and the payload.
* It then either streams the payload into the core DFT logic (core test) or
  sends the final hop to its router under test (router test).
* Operational packets pass straight to the processor.

The node forwards its copies before it applies the packet locally, so the
copies leave as early as possible. This order is an implementation choice.

**`packet_buffer`** is used both as the consumption buffer and as the
injection buffer. It is a flit FIFO that also counts packets. It refuses a
new head flit while it already holds three packets.

## Router test logic (`rtl/router_dft.sv`)

Every input port (x+, x−, y+, y−) has a demultiplexer. Normally the flits go
to the switch. While the router is under test (`rt_test`), the port named by
`tport` is cut off from the switch. A multiplexer steers that port's flits
to the scan chains instead:

* The header flit is dropped.
* Each payload flit is one shift of up to 32 chains.
* After every `shift_len` shifts there is one capture cycle.

Scan-outs go into the MISR while shifting. The router's other combinational
outputs (`comb_out`) go into it in the capture cycle. On a rising edge of
`e`, `resp_inject` sends the signature to the tester through the injection
port. At all other times the processor's packets use that port.

Test data therefore never pass through the switch of the router being
tested. This is what allows delivery and test application to overlap.

## Core test logic (`rtl/core_dft.sv`)

A demultiplexer after the consumption side routes a flit to the scan logic
only when two things hold: the flit belongs to a test packet, and the core's
class pin `c` is high. Any other flit goes to the processor. A core
therefore needs no scan-in pins of its own. The only extra pins for the
whole chip are one per class (at most four) and the global response pin `e`.

The scan path works as follows:

* **Scan trees.** Bit i of each flit is the root of scan tree i, which
  drives one chain in each of `N_GRP` groups.
* **Group register.** A one-hot group register, starting at group 0, lets
  one group shift at a time, which limits shift power. After `shift_len`
  shifts the register passes to the next group. After the last group, one
  capture cycle follows.
* **Compaction.** Outputs of the shifting group are XORed per tree into the
  MISR. Unknown bits can be blocked with `xmask`.

Group loads are counted in shifts, not packets, so a group load may span any
number of packets. A core with long chains is handled by raising
`shift_len`.

The method borrows its low-power scan scheme from earlier work and does not
describe it. Here it is reduced to the one-hot group register and per-group
shift enables; clocks are not gated.

## Link self-test (`rtl/link_bist.sv`)

On `bist_start`, every router drives its outgoing links with 2·32+2
patterns:

* all zeros;
* all ones;
* a walking one;
* a walking zero.

Together these expose any wire stuck at 0 or 1 and any short between two
wires. Each incoming link is compared against a local copy of the sequence.
A link is marked in `link_fault` if a pattern differs, or if not all
patterns have arrived within `TIMEOUT` cycles (an open link). Ports with no
neighbour are ignored: corner routers have two ports, edge routers three.
With link delay d, a run takes 2W+4+d cycles: 70 cycles for 32-bit links
and d = 2.

The pattern set is an implementation choice. The method only requires that
the links be self-tested inside the routers.

## Top level (`rtl/noctest_top.sv`)

`noctest_top` places `NX × NY` nodes (default 8×8, tester at node (3,0)) and
wires the chip-wide pins to them:

| pin | function |
|-----|----------|
| `class_c[NCLASS]` | class pins; `node_class` says which pin each core listens to |
| `e` | all units under test send their signatures |
| `bist_start` | starts the link self-test in every router |
| `rt_test`, `tport` | per node: router under test, and the port its data arrive on |
| `core_shift_len[class]` | scan length per core class |
| `rt_shift_len[degree]` | scan length per router kind (2, 3 or 4 ports) |

Everything outside the test logic appears as flattened per-node port arrays,
indexed by n = y·NX + x:

* links: `lk_rx_*`, `lk_tx_*`;
* switch ports: `sw_in_*`, `sw_out_*`;
* network side of the buffers: `net_in_*`, `net_out_*`;
* processors: `proc_*`, `pin_*`;
* scan chains: `core_*`, `rt_*`.

To use the top in a chip, connect `lk_tx` of each port to `lk_rx` of the
facing port of the neighbour. Put the router's switch and its fault-tolerant
routing between `sw_in`/`sw_out` and `net_in`/`net_out`.

## Where this design departs from the method

* **Packet store.** The method keeps a test packet in the consumption buffer
  until the node has sent all its copies. Here the node controller copies
  the packet into its own store (up to `MAX_PAY` payload flits) and frees
  the buffer slot at once. The node still cannot take its next packet before
  its copies are out, so the bottleneck at the first receiver remains.
* **Last step of a router session.** The last unicast is an ordinary
  packet handed to the router, so its path is up to the routing. The router
  under test takes test data only from the input port `tport` names, so the
  path must end on that port. One chain entry pairs one serving router with
  one router under test, so a serving router serves one router per session.
* **Chain layout for router tests.** The method orders serving routers and
  routers under test into one chain. Here each chain entry pairs a serving
  router with its router under test, and only serving routers take part in
  the halving. The steps come out the same as in the six-router example.
* **Odd splits.** The method splits a part into "two equal halves". For odd
  sizes this design gives the larger half to the receiving side, as above.
  This reproduces the published example trees.
* **Response path.** The method says only that the signature is sent back
  as one packet at the end. Here a rising edge on `e` starts it, and the
  packet is a header plus one signature flit.
* **Routing.** Copies are ordinary unicast packets handed to the router.
  Whether they avoid faulty parts depends on the router's own fault-tolerant
  routing, which is outside this design.
* **Own choices.** The packet and header formats, the link test patterns,
  the group register, the MISR polynomial and all handshakes are choices of
  this design.

## What is not here

* **The router.** The switch, virtual channels and the fault-tolerant
  routing algorithm are not included. The method assumes some fault-tolerant
  routing and does not define one, so the node only has the ports where a
  router connects.
* **The cores and the scan chains** of cores and routers.
* **The tester and the test planning.** Choosing sessions and serving
  routers, building chains, and scheduling for power are done in software.
* **Launch-and-capture timing for transition-fault tests.** The capture
  here is a single functional cycle, as stuck-at tests need.

## Sizes against the evaluated configurations

* **8×8 mesh.** It fits at the default parameters. The largest router
  session has 23 routers, and a whole-mesh core class has 64 members; both
  fit `MAX_CHAIN` = 64. A 64-entry chain packet is 1 + 32 + 16 = 49 flits,
  which matches the buffer slot size. The 64-member class is simulated end
  to end. Of the 23-router session, 19 routers are simulated; the other
  four need last steps over several links, which the test's network model
  does not deliver.
* **Benchmark cores.** They have 6,642 to 97,796 scan cells. Over 128 chains
  that is 52 to 765 shifts per group load, and `shift_len` is 16 bits.
* **Routers.** They have 1,324 to 2,458 flip-flops, which is 42 to 77
  shifts over 32 chains.
* **6×6 mesh.** Needs `NX = NY = 6`.
* **16×16 mesh.** Needs `NX = NY = 16` and a larger `MAX_CHAIN`. The 8-bit
  chain-length field limits one multicast to 255 destinations.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_misr` | against a reference model, including masked bits and clear |
| `tb_packet_buffer` | order under random back-pressure; never more than three packets |
| `tb_mcast_split` | every chain length 1–64 from every start: each member gets exactly one copy in ceil(log2 N) rounds; both example trees above |
| `tb_mcast_node_ctrl` | every copy a node sends against an independent reference of the halving rule, in both modes; operational pass-through |
| `tb_core_dft` | group order, capture, signature and response packet, using a model of the scan chains |
| `tb_router_dft` | port demultiplexing, header skipping, capture, signature |
| `tb_link_bist` | stuck wire, short and open link are found; the run time |
| `tb_noctest_node` | one node with its links looped back |
| `tb_noctest_top` | end to end at the default 8×8 size (next section) |

`tb_noctest_top` uses an ideal network that delivers every packet ten cycles
after it leaves. Five links are made defective. The test then runs:

1. The link self-test, which must find exactly those links.
2. A router session of six routers, one of them defective, which must take
   five unicast steps.
3. A session for the four two-port corner routers, which must take four
   steps. Meanwhile routers with three and four ports are given a different
   scan length, so using the wrong length would show.
4. A session for 19 of the three-port edge routers, each served by its inward
   neighbour, which must take seven steps. The network model only delivers
   a last step to a direct neighbour. The neighbours of the corners could
   each serve only one of their two edge routers, so four of the 23 edge
   routers are left out.
5. A core session of eight cores, one of them defective, which must take
   four steps. Each group load spans two packets, and cores of other classes
   must stay untouched.
6. A core session with one class of all 64 cores. It uses the longest chain
   and 49-flit packets that fill a whole buffer slot. It must take seven
   steps and exactly 63 forwarded copies per packet. Each core's signature
   is worked out from its own chain contents at the start.
7. Operational traffic.

Defective units must return a different signature. The test counts each
mechanism (link faults, last-hop packets, multicast copies, group changes,
captures, full buffers, operational packets) and fails if any count is zero.
It finishes in well under a second.

To run a testbench with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/noctest_pkg.sv tb/tb_noctest_top.sv \
              --top-module tb_noctest_top -Wno-fatal
    ./obj_dir/Vtb_noctest_top

## Trusting and changing it

* **What the testbenches exercise.** The multicast split and the node
  controller are checked against independent references and the worked
  examples above.
* **What they do not.** The end-to-end test uses an ideal network, so
  contention, virtual channels and routing around faults are not exercised.
* **Parameter defaults.** `MAX_CHAIN`, `MAX_PAY`, `N_GRP`, the MISR
  polynomial and the header layout are implementation choices. Change them
  through parameters and `noctest_pkg`.
* **Growing the chain.** `MAX_CHAIN` above 64 also needs the buffer slot
  size to grow; the node derives it as 1 + MAX_CHAIN/2 + MAX_PAY. Above 255
  destinations it also needs a wider chain-length field.
