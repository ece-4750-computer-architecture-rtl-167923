# Eight-node bidirectional ring network

This is a small on-chip network. Eight routers sit on a ring, each linked to
both neighbours and to one local terminal. A terminal hands the network a
22-bit message and the network delivers it to the terminal named in the
message. Every packet is a single flit, and every flit is a single phit.

Three ideas keep the routers small:

- **Elastic-buffer flow control.** Each link between two routers is a
  two-entry queue. A packet that the next router cannot take yet waits in the
  link itself, so the routers need no output buffers.
- **Bubble flow control.** A ring has a cyclic buffer dependency, so it can
  deadlock. A simple rule on packet injection prevents that.
- **Single-cycle routers.** A router has three input queues, a 3x3 crossbar
  and one round-robin arbiter per output. A packet at the head of an input
  queue crosses the router in the cycle it wins arbitration.

Two versions of the network are built, and they differ only in how a router
picks a direction for a new packet:

- the **baseline** routes greedily: it takes the shorter way round, and
  east when both ways are equally long;
- the **alternative** routes adaptively: it weighs distance against how full
  the nearby queues are, and may send a packet the long way round.

The top level, `lab4_net`, holds both rings side by side.

## Message format

| bits  | field   | meaning |
|-------|---------|---------|
| 21:19 | dest    | destination terminal (router id) |
| 18:16 | src     | source terminal |
| 15:8  | opaque  | free for the user; the network ignores it |
| 7:0   | payload | data |

The package `net_msg_pkg` defines these fields as the packed struct
`net_msg_t`. It also holds the constructor `mk_net_msg(src, dest, opaque,
payload)` and the router port numbers.

## Structure

```
lab4_net                      baseline ring + alternative ring, separate terminals
└── ring_net  (x2)            NUM_ROUTERS routers, 2 channel queues per link
    ├── normal_queue (x2N)    channel queues, 2 entries (the elastic buffers)
    └── router (xN)
        ├── normal_queue (x3) input queues, 4 entries
        ├── crossbar          3x3, message wide, one select per output
        └── router_ctrl
            ├── route_greedy   (baseline: every input)
            ├── route_adaptive (alternative: terminal input only)
            └── rr_arbiter (x3) one per output port
```

Each router has three ports, and each port is a val/rdy input plus a val/rdy
output:

| port | connects to |
|------|-------------|
| 0 | west neighbour |
| 1 | local terminal |
| 2 | east neighbour |

East means increasing router id. Router `i`'s port 2 feeds a channel queue
into port 0 of router `(i+1) mod N`. A second channel queue runs the other
way, from that router's port 0 back into port 2 of router `i`. Router `N-1`
wraps around to router 0.

A handshake completes on a rising clock edge where val and rdy are both high.
`normal_queue` sets `enq_rdy` from its registered count alone. So a queue
does not pass data straight through when empty, and it does not accept a new
entry in the cycle it is dequeued while full. Each router output is
combinational from the queue heads and the arbiters. Every path between
routers therefore goes through at least one register, and no combinational
path spans two routers.

## Timing

A packet accepted by the network on clock edge `t` spends one cycle in each
queue it passes through. If its destination is `h` hops away, the sink
accepts it at edge `t + 1 + 2h` at the earliest:

- 1 cycle in the source router's terminal input queue;
- for each hop, 1 cycle in the channel queue and 1 cycle in the next router's
  input queue.

So a packet sent to its own terminal comes out one cycle after it is
accepted. For uniform random traffic on eight nodes, the mean shortest
distance is 2 hops, which gives a zero-load latency of 5 cycles.

## Router control

The control unit, `router_ctrl`, has an input side and an output side.

**Input side.** For each input queue, the destination at the queue head goes
through route computation. The result is a one-hot request for one output
port, and it is raised only while the queue head is valid.

**Output side.** For each output port, the requests aimed at that port are
gathered and a round-robin arbiter picks one winner:

- the port's `val` is high when any input asks for it;
- the winner sets the port's crossbar select;
- if the port's `rdy` is high, the winning input is dequeued (`in_deq_rdy`).

The arbiter's priority pointer moves past the winner only when the port's
`rdy` is high. A grant that does not turn into a transfer therefore keeps
its priority.

In the baseline every input uses `route_greedy`. This counts hops east
`(dest - id) mod N` and hops west `(id - dest) mod N`, and picks the smaller;
a tie goes east. A packet that has arrived goes to port 1. A packet already
in the ring never turns round under this scheme: after each hop its
remaining distance only shrinks in the direction it is travelling.

## Bubble flow control

Without a rule on injection, a ring can fill every buffer in one direction
with packets that are all waiting for the next buffer. Nothing can then move.
Bubble flow control reserves a free buffer (a "bubble") in each direction:

- a packet from the terminal that is routed **east** may leave only while the
  router's **west** input queue has **more than one** free entry;
- a packet routed **west** may leave only while the **east** input queue has
  more than one free entry.

The queue checked is the one that carries traffic in the same direction as
the new packet. Packets already in the ring are never held back by this
rule. That is why the ring always keeps the bubble it needs to move forward.
While the rule blocks a packet, that packet's request is withheld, so the
other inputs can still use the port.

The rule can be switched off with the parameter `BUBBLE = 0`. This exists
only to show the deadlock it prevents. In `ring_net_tb`, every node sends 20
packets to the node half-way round, so all of them go east:

- with the rule (`BUBBLE = 1`), all packets are delivered;
- without it, all 160 packets are still stuck after 300 cycles without a
  single delivery.

## Adaptive routing (the alternative ring)

In the alternative ring, only the terminal input's route computation
changes. `route_adaptive` gives each direction a cost:

```
cost_east = hops_east + CONG_WEIGHT * (packets in the east channel queue + packets in the west input queue)
cost_west = hops_west + CONG_WEIGHT * (packets in the west channel queue + packets in the east input queue)
```

The packet goes the cheaper way, east on a tie, and `CONG_WEIGHT` defaults
to 1. The two queues in each cost are the ones adjacent to this router that
hold traffic moving in that direction:

- the channel the packet would enter;
- the input queue that brings other packets heading the same way into this
  router.

Because all of these queues are adjacent to the router, their free counts
are used in the same cycle, with no register stage. The ring passes each
channel queue's free-entry count back to the router that feeds it, through
the router ports `east_chan_free` and `west_chan_free`. The baseline leaves
these ports unconnected inside.

Packets already in the alternative ring keep going the way they arrived
until they reach their destination. A packet sent the long way is therefore
never turned back. Its path is still a single direction round the ring, so
the bubble argument above still holds.

A cost that counted only the channel queues (weight 2) hardly ever changed a
route. Counting the input queue as well is what makes the scheme useful, as
the table in the next section shows. Adaptive routing gives up in-order
delivery between a source and a destination; the greedy ring keeps it.

## Measured behaviour

`net_sim_tb` offers traffic to both rings at once. Each terminal generates a
packet in a cycle with a given probability, into an unbounded source queue.
Latency runs from the first edge at which a packet could have been accepted
to its delivery, averaged over a 1000-cycle window after a 300-cycle warm-up.
Generation stops after the window and the network is drained, so numbers
near saturation are somewhat optimistic.

The tables give average latency in cycles. Destination patterns (`src` is
the sending terminal, `random` a uniform 3-bit value):

| pattern    | destination                        |
|------------|------------------------------------|
| urandom    | `random % 8`                       |
| partition2 | `(random & 3'b011) \| (src & 3'b100)` |
| partition4 | `(random & 3'b001) \| (src & 3'b110)` |
| tornado    | `(src + 3) % 8`                    |
| neighbor   | `(src + 1) % 8`                    |
| complement | `~src`                             |

Rates at or below saturation:

| pattern | rate | baseline | alternative |
|---------|------|----------|-------------|
| urandom | 5 %  | 4.9 | 4.9 |
| urandom | 45 % | 6.8 | 6.2 |
| urandom | 55 % | 27.0 | 8.2 |
| tornado | 5 %  | 7.1 | 7.1 |
| tornado | 25 % | 17.5 | 9.1 |
| tornado | 35 % | 255 | 11.5 |
| complement | 45 % | 7.0 | 7.0 |
| partition2 | 55 % | 4.7 | 4.7 |
| partition4 | 65 % | 2.7 | 2.7 |
| neighbor | 65 % | 3.0 | 3.0 |

Past saturation:

| pattern | rate | baseline | alternative |
|---------|------|----------|-------------|
| urandom | 65 % | 143 | 55 |
| partition2 | 65 % | 14.7 | 16.4 |
| complement | 55 % | 85 | 85 |
| tornado | 45 % | 553 | 144 |

What the numbers show:

- **Saturation.** On uniform random traffic the baseline saturates between
  55 % and 65 % injection, and the alternative at about 65 %. On tornado
  traffic the baseline saturates near 30 % and the alternative near 40 %.
- **Complement traffic.** The adaptive scheme gains nothing here: every
  route is at most 3 hops against at least 5, and the congestion terms
  rarely differ by enough to change a route.
- **No deadlock.** Every packet was delivered at every rate, including far
  past saturation.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `NUM_ROUTERS` | 8 | ring_net, router, router_ctrl, route_* | ring size, at most 8 with 3-bit ids (4 is tested) |
| `ADAPTIVE` | 0 | ring_net, router, router_ctrl | 0 greedy baseline, 1 adaptive alternative |
| `BUBBLE` | 1 | ring_net, router, router_ctrl | bubble rule on injection; 0 only to demonstrate deadlock |
| `INQ_ENTRIES` | 4 | ring_net, router, router_ctrl, route_adaptive | router input queue depth (at least 2 for the bubble rule) |
| `CHAN_ENTRIES` | 2 | ring_net, router, router_ctrl, route_adaptive | channel queue depth |
| `CONG_WEIGHT` | 1 | ring_net, router, router_ctrl, route_adaptive | weight of congestion against hops |
| `MSG_NBITS`, `NUM_MSGS` | 22, 2 | normal_queue | queue width and depth |

The message field widths are constants in `net_msg_pkg`: payload 8, opaque
8, src/dest 3.

## What follows the specification and what is chosen here

The following come from the specification:

- the topology, the eight nodes and the terminal on every router;
- the port numbering;
- the 22-bit message layout;
- four-entry input queues and two-entry channel queues with a free-entry
  output;
- the 3x3 message-wide crossbar driven by per-output selects;
- per-input route computation producing one-hot requests, and per-output
  round-robin arbiters;
- greedy routing with east on a tie;
- the bubble rule (more than one free entry in the same-direction input
  queue, applied to terminal injections only);
- an adaptive scheme that senses congestion through queue free counts.

These are choices made in this implementation:

- **East means increasing router id.** The specification also calls the
  tie direction "clockwise" without fixing which way that is; east was
  followed.
- **Queue timing.** The "normal" queue has one cycle of latency and does not
  pipeline a full queue. This matches the 5-cycle zero-load latency quoted
  for uniform random traffic.
- **Arbiter details.** After reset requester 0 has the highest priority, and
  the pointer advances only on a completed transfer.
- **Adaptive scheme.** The cost formula, the queues it reads and
  `CONG_WEIGHT = 1` are this implementation's own. So is keeping the travel
  direction of packets already in the ring, and so are the two
  channel-free-count ports on the router.
- **Congestion range.** Only adjacent queues are sensed. Congestion
  information from farther away, which would need a register per extra hop,
  is not built.
- **Reset.** A synchronous active-high reset empties all queues and resets
  the arbiters; queue storage itself is not reset.
- A crossbar select of 3 outputs zero.
- `lab4_net` puts the two rings side by side so both can be simulated from
  one top.

Not included:

- the functional reference model (an eight-port crossbar); the testbenches
  use scoreboards instead;
- the optional four-port bus;
- the processors and caches the network would later connect to.

## Verification

Each testbench is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `net_msg_pkg_tb` | field positions of the packed message, port numbers |
| `normal_queue_tb` | 2- and 4-entry queues against a reference queue: one-cycle latency, full behaviour, free count, random traffic |
| `crossbar_tb` | every select combination with random data |
| `rr_arbiter_tb` | rotation under full load; random requests and enables against a pointer model |
| `route_greedy_tb` | all 64 (router, destination) pairs, including the east-on-tie case |
| `route_adaptive_tb` | every combination of router, destination and queue free counts against the cost formula; a non-minimal case spelled out |
| `router_ctrl_tb` | baseline and adaptive control units against a cycle model (routes, bubble rule, arbiters, selects, dequeues) |
| `router_tb` | one router: a packet from its terminal to itself in 1 cycle; bubble rule in both directions; random traffic on all ports with per-port ordering |
| `ring_net_tb` | directed cases with latency 1 + 2h; prolonged neighbour, hotspot, tornado and random traffic with sink stalls on 8- and 4-node rings; the deadlock demonstration |
| `lab4_net_tb` | both rings at default size, run end to end (details below) |
| `net_sim_tb` | the latency sweep above, no loss or deadlock at any rate, zero-load latency at 5 % injection, adaptive better than greedy on tornado at 35 % |

`lab4_net_tb` runs the following on both rings:

- every source/destination pair alone, checking latency and injection
  direction;
- eight traffic patterns at full injection, with and without sink stalls
  (the six above, a hotspot on one node, and all-to-all);
- counts of the design's mechanisms, each of which must occur at least once:
  bubble stalls, arbitration conflicts, channel back-pressure, sink
  back-pressure, wrap-around transfers, east-on-tie routes and non-minimal
  adaptive routes.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/net_msg_pkg.sv tb/lab4_net_tb.sv \
          --top-module lab4_net_tb -o sim
./obj_dir/sim
```

Replace `lab4_net_tb` with any other testbench name. Every testbench runs in
well under a second.

Lint:

```
verilator --lint-only -Wall -y rtl rtl/net_msg_pkg.sv rtl/lab4_net.sv
```

This reports only unused signals:

- the channel free counts in the baseline routers;
- the internal `term_bubble_stall` flag, which the testbenches read to count
  bubble stalls;
- the upper bits of a loop index.
