# Hypercube packet-routing network: switches for deterministic and randomized bit-fixing

A hypercube network connects N = 2^D processors. Each has a D-bit id, and two
processors are linked exactly when their ids differ in one bit. Each processor has a
switch with D incoming and D outgoing channels. Channel d leads to the neighbour across
dimension d. A packet reaches its destination by *bit-fixing*: at every switch it takes
one dimension in which the current id and the destination still differ, and the hop
across that dimension fixes that bit. The routing is oblivious: the path of a packet
does not depend on any other packet.

This RTL builds the switch in three forms, and a whole network from each:

| network | how a packet chooses its next hop |
|---|---|
| deterministic (Det-R) | always the lowest differing bit of (destination xor switch id) |
| first randomized variant (Rand-Trans; Rand-Trans-OOO with phase-priority queues) | each packet gets a random *intermediate* destination when it enters the network. It is routed deterministically there, then deterministically to its real destination. |
| second randomized variant (DRand-Trans-OOO) | in its first phase, a packet flips a coin for each dimension it has not yet passed. It hops along the lowest dimension whose coin says "go". Once every dimension has been decided, it is routed deterministically to its destination. |

The randomized forms spread adversarial traffic patterns over the network. The classic
example is the transpose permutation, where the ids' upper and lower halves swap. They
pay for it with a second routing phase. "Trans" means a packet starts its second phase as
soon as its own first phase ends. "OOO" means an output queue lets first-phase packets
overtake second-phase ones.

## The switch

```
 in channel d ──► [packet buffer] ──► channel circuit ──┬─► deliver to processor
 (d = 0..D-1)      one packet         (variant-specific) │
 processor ───► [packet buffer] ──► channel circuit ───┤
 (injection)                                            └─► write request to output queue k
                                                                 │
 output queue k (W packets) ──► out channel k ──► neighbour s^2^k, its in channel k
```

There is one input buffer per incoming channel and one for the local processor's
injection. Each holds a single packet. That is enough because a packet that is not at
its destination always moves on into an output queue. In every cycle, every buffer's
channel circuit decides about its packet:

* **Deliver.** The packet's destination equals the switch id. It leaves the network on
  `dlv_valid[q]` / `dlv_pkt[q]`, a one-cycle strobe per input buffer `q`. The processor
  must take it.
* **Route.** The circuit raises a write request to exactly one of the D output queues.

Several buffers may pick the same queue in one cycle. The queue accepts all of them if
it has room. Otherwise it accepts them in input order (channel 0 first, injection last),
and a refused packet waits in its buffer. A full buffer is not ready, so the neighbour's
output queue holds its packet. This is the network's only flow control. Each output queue
sends one packet per cycle over a valid/ready link.

### Channel circuits

* `hc_channel_det` is the deterministic circuit (called Block A). `hc_comparator` xors
  the immediate destination with the switch id. If the result is zero, the packet is
  delivered. Otherwise `hc_priority_encoder` finds the lowest set bit and `hc_router`
  turns it into a one-hot queue request.
* `hc_channel_rand1` is the first randomized variant. `hc_dest_exchange` compares the
  immediate destination with the switch id. If they match, the packet has reached its
  intermediate destination, and the final destination is copied over the immediate one.
  Block A then acts on the result, so the packet is either delivered (when the
  intermediate and final destinations coincide) or routed towards its final destination.
  The random intermediate destination is drawn by the switch where the packet is injected.
* `hc_channel_rand2` is the second randomized variant. The packet carries a mask: the set
  T of dimensions still open, plus an "all fixed" flag.
  - While the flag is clear, a random id from `hc_rng` is xored with the switch id. This
    gives one fair coin per dimension.
  - `hc_dim_select` takes the lowest dimension that is both in T and chosen by its coin.
  - If no dimension is chosen, `hc_alt_select` forces the packet to a random neighbour,
    using a second random source.
  - `hc_mask_gen` removes every dimension up to the one taken, because the lower ones were
    decided "stay". A forced hop empties T. The flag is set once T is empty.
  - With the flag set, the circuit behaves like Block A on the final destination.

  Choosing among all open dimensions at once means a packet never waits in a switch for a
  later decision, so the one-packet input buffer is still enough.

### Out-of-order queues

`hc_output_queue` has a parameter `OOO`. With `OOO = 0` it is first-in first-out. With
`OOO = 1`, the oldest packet still in its first phase leaves before any packet in its
second phase. In the first randomized variant, a first-phase packet is one whose
immediate and final destinations differ. In the second, it is one whose "all fixed" flag
is clear. Internally the queue is a shifting array, kept oldest first. The leaving entry
is squeezed out, and this cycle's accepted writes are appended behind it.

## Packet format

Every network uses the same layout (`PKT_W = 3D + 1 + DATA_W` bits):

| bits | field |
|---|---|
| `[D-1:0]` | immediate destination: the id routed towards in the current phase |
| `[2D-1:D]` | final destination |
| `[3D-1:2D]` | open-dimension set T (second randomized variant) |
| `[3D]` | "all fixed" flag (second randomized variant) |
| `[3D+DATA_W:3D+1]` | payload |

The processor supplies only the final destination and the payload. The injecting switch
fills in the rest:
* deterministic network: immediate destination = final destination;
* first randomized variant: immediate destination = a random id;
* second randomized variant: T = all dimensions, flag clear.

## Timing

A packet that enters an input buffer at clock edge t is in an output queue after edge
t+1 and in the next switch's input buffer after edge t+2. So a hop costs two cycles when
there is no contention. A lone packet injected at edge 0 is delivered in cycle 1 + 2h,
where h is the Hamming distance between source and destination. Queue write grants use
the queue occupancy from the start of the cycle, never the downstream ready. Because of
this, no combinational path runs through a link, and the network has no combinational
loops.

## Files

| file | contents |
|---|---|
| `rtl/hc_pkg.sv` | variant enum, packet width |
| `rtl/hc_packet_buffer.sv` | one-packet input buffer |
| `rtl/hc_output_queue.sv` | multi-write output queue, FIFO or OOO |
| `rtl/hc_comparator.sv`, `hc_priority_encoder.sv`, `hc_router.sv` | parts of Block A |
| `rtl/hc_channel_det.sv` | Block A |
| `rtl/hc_dest_exchange.sv`, `hc_channel_rand1.sv` | first randomized variant |
| `rtl/hc_rng.sv`, `hc_dim_select.sv`, `hc_alt_select.sv`, `hc_mask_gen.sv`, `hc_channel_rand2.sv` | second randomized variant |
| `rtl/hc_switch.sv` | a switch, with `VARIANT` and `OOO` parameters |
| `rtl/hc_network.sv` | 2^D switches wired as a hypercube |
| `rtl/hypercube_top.sv` | one network of each variant side by side, with separate processor ports (`det_*`, `r1_*`, `r2_*`) |

Top-level parameters:

| parameter | default | meaning |
|---|---|---|
| `D` | 4 | dimensions; the network has 2^D switches |
| `W` | 8 | output queue depth |
| `DATA_W` | 8 | payload bits |
| `RAND1_OOO` | 0 | first randomized network: 0 for FIFO queues (Rand-Trans), 1 for phase-priority queues (Rand-Trans-OOO) |
| `RAND2_OOO` | 1 | second randomized network: OOO queues (DRand-Trans-OOO) |
| `RAND2_SHARED_RNG` | 0 | second randomized network: 0 for two random sources per channel, 1 for one shared source |

The `ev_*` outputs pulse when, in some switch:
* two packets contend for one queue;
* a full queue refuses a packet;
* a destination exchange happens;
* a forced hop happens;
* an OOO queue lets a younger packet leave first.

They are there for measuring congestion.

## Simulating

Every block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_hypercube_top rtl/hc_pkg.sv tb/tb_hypercube_top.sv
./obj_dir/Vtb_hypercube_top
```

* `tb_hypercube_top` runs the full-size design: three 16-switch networks. The workloads are
  a random permutation, the transpose, four random permutations at once, the transpose
  four times, and a saturation run. Every packet is checked for correct single delivery,
  and the routing time is printed. The test also requires each mechanism above to happen.
  It takes a few seconds.
* `tb_hc_workloads` compares the four schemes on networks of 4, 8 and 32 switches:
  Det-R, Rand-Trans, Rand-Trans-OOO and DRand-Trans-OOO. It uses the first four
  workloads and prints each scheme's routing time and its speedup over Det-R. In these
  small networks, deterministic routing is usually 1.3 to 2 times faster. The exception is
  the transpose sent D times on 32 switches, where the randomized schemes come out about
  10% ahead. The build takes a few minutes.
* `tb_hc_network` checks the 1 + 2h latency for every source/destination pair of an
  8-switch network. It also drives all three variants into back-pressure with 2-packet
  queues.
* `tb_hc_switch` scores every packet through a single switch under random traffic and
  random back-pressure.
* The leaf testbenches check the small blocks exhaustively or against reference models.
  `tb_hc_channel_rand2` predicts every random decision with its own model of the
  generators.
* `tb/hc_net_driver.sv`, `tb/hc_wl_unit.sv` and `tb/hc_switch_harness.sv` are reusable stimulus and
  scoreboard modules.

At 16 switches, the deterministic network finishes the loads with one or four packets per
switch in 10 to 15 cycles. The randomized networks take 14 to 21 cycles, because their
paths are longer.

## Design choices and limits

The network's structure, the three channel circuits, one-packet input buffers and
queues of depth W follow the original specification of this network. The following are
this design's own choices:

* **Sizes.** D = 4 is the size used as a worked example in the specification, whose
  simulation studies range from 2^2 to 2^18 switches. The queue depth (8) and payload width (8) are not
  specified and were chosen here.
* **Injection port and delivery strobe.** The processor interface is not specified; here
  it is a (D+1)-th input buffer for injection and a one-cycle strobe for delivery.
* **Back-pressure.** When an output queue is full, the packet waits in its input buffer,
  which stalls the link behind it. Queue depth is not specified, and neither is what
  happens when a queue fills.
* **Random sources.** Each is a 32-bit xorshift generator, seeded differently in every
  switch and channel. The coins are therefore pseudo-random and repeat from run to run.
  By default, each channel of the second variant has two generators: one for the random
  id and one for the forced-hop choice. With `RAND2_SHARED_RNG = 1` (`SHARED_RNG` on the
  lower levels), one wider generator serves both uses.
* **Forced-hop channel.** The forced hop takes the random value modulo D, which is exactly
  uniform only when D is a power of two.
* **Deadlock.** The randomized variants route in two phases, and both phases share the
  same queues. With finite queues, a cycle of full queues is therefore possible in
  principle. The deterministic network routes in strict dimension order and cannot
  deadlock. No deadlock was seen in the tested loads with 8-packet queues (nor in the
  8-switch network with 2-packet queues). To avoid it entirely, make W at least the
  number of packets a queue can be offered.
* **Not built.** The globally synchronised two-phase schedule (Rand-Sync), where phase two
  starts only when all packets have finished phase one, is not built. It needs a
  network-wide barrier and somewhere to park packets at their intermediate destination,
  and the switch has neither. The processors themselves are outside this RTL.
