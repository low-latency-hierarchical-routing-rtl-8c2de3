# Hierarchical tree routing with fullest-queue stochastic arbitration

This is synthesizable SystemVerilog for a network that carries spike events
between the computing nodes of a multi-FPGA spiking-neural-network
simulator. The nodes are leaves of a tree. Every router has nine ports:
eight lead down to nodes or lower routers, and one leads up. A router is
told its level and index by parameters. From those it works out which
destinations lie below it, so one router design serves every level.

Wherever several inputs compete for one output, the winner is the input
whose FIFO holds the most words. Inputs with equal fill levels are
separated at random. Crowded queues drain first, which cuts worst-case
latency compared with rotating (round-robin) priority, and no larger
buffers are needed for it.

The default system has 128 nodes, 16 level-1 routers and 2 level-2 routers.
It runs from a single 100 MHz clock. Each hop between boards is modelled as
a transceiver link with a 13-cycle flight time.

## Topology and addresses

```
        L2 router 0  <---- peer link ---->  L2 router 1
        /   ...   \                          /   ...   \
   L1 r0  ...  L1 r7                    L1 r8  ...  L1 r15
   / | \                                  / | \
 n0 .. n7        ...                   n64 .. n71   ...  n127
```

- Node `n` sits on down port `n % 8` of level-1 router `n / 8`.
- Level-1 router `r` sits on down port `r % 8` of level-2 router `r / 8`.
- The up ports (port 8) of the two level-2 routers are linked to each
  other. A level-3 router is not needed for 128 nodes.
- A node address has 7 bits, `d[6:0]`:

| router | owns nodes | in range: goes to port | out of range |
|---|---|---|---|
| level 1, index `i` | `8i .. 8i+7` | `d[2:0]` | up (8) |
| level 2, index `j` | `64j .. 64j+63` | `d[5:3]` | up (8) |
| level 3 (decode only) | all | `d[6]` | - |

Smaller systems are the same top with `N_NODES` set to a multiple of 8
between 8 and 128. Below 72 nodes there is one level-2 router, whose up port
is left open. Its unused down ports are tied idle.

## Messages and flits

A message is ten 64-bit flits: one header and nine tails. The low four bits
of every flit are its control code. The header uses `0000`, and the tails
use `0001` to `1001` in order.

| flit | bits | content |
|---|---|---|
| header | [63:57] | destination node (this is all the routers look at) |
| | [56:50] | source node |
| | [49:34] | sequence number of the source |
| | [33:4] | send time, in cycles of the shared time base |
| | [3:0] | `0000` |
| tail k (1..9) | [63:4] | bits `60(k-1) .. 60k-1` of the event block |
| | [3:0] | `k` |

The event block is 512 bits, zero-extended to 540. It holds sixteen 32-bit
AER event words, each `{valid, engine[3:0], neuron[14:0], time step[11:0]}`.
Empty slots are all zero. Only the destination field and the control codes
matter to the network. The rest is used by the traffic nodes and their
checkers.

## Inside a router (`hiaer_router`)

```
 in[0..8] -> input FIFO x9 --head--> routing_logic x9 --dir--> rw_controller x9
                 |  (word counts)                                |req  ^grant
                 +------------------> stochastic_arbiter x9 <----+
                                        (one per output)         |wr, wr_dir
 out[0..8] <- output FIFO x9 <------------- crossbar 9x9 <--------+
```

**Input FIFOs.** Each input port has a 1024-word first-word-fall-through
FIFO. It accepts a flit only while it holds fewer than 1012 words. The
port's `in_ready` is exactly that signal, and it is what stops the link's
receive buffer. The 12 spare words cover a whole message plus slack.

**Routing logic.** This is a combinational decode of the destination field
of the head flit (see the table above).

**RW state machine (`rw_controller`), one per input.** It has three states:

- `IDLE`: the FIFO is empty. When it is not, go to `RW`.
- `RW`: a header is at the head of the FIFO. The machine requests the
  routed direction from that direction's arbiter.
  - On a grant, the header is read from the input FIFO and written to the
    output FIFO in the same cycle, and the machine goes to `DET`.
  - Without a grant, nothing is read and the request persists.
  - If the FIFO has become empty, go back to `IDLE`.
  - A flit at the head that is not a header is dropped, so a stray tail
    cannot block the port.
- `DET`: the direction is held by this input. Each cycle, a tail flit
  moves if the input FIFO has one and the output FIFO is not full.
  Writing tail `1001` raises `done`, which releases the direction, and the
  machine returns to `RW`.

All nine machines work in parallel. Nine messages can move at once when
they target different directions.

**Stochastic arbiter, one per output direction.** Its inputs are:

- `req`: which inputs want this direction. At most one input asks per
  cycle for each of its own messages.
- `usage`: the word count of every input FIFO.
- `space`: the output FIFO is not nearly full.

Each requester gets the key `{usage, 3 random bits}`. The random bits come
from a 32-bit LFSR that steps every cycle, and each input sees different
bits. The largest key wins, and equal keys go to the lower index. So the
fullest FIFO always wins, and among equally full FIFOs the choice is random.

A grant (the *priority channel*) is given only while the direction is not
busy and `space` is high. After a grant the arbiter marks the direction
busy, with the winner as owner, until the owner's `done`. Because a header
is accepted only when the output FIFO has at least 12 free words, a granted
message always fits. Tails of one message are never interleaved with
another's.

**Crossbar.** This is an OR-select per output, driven by each input's write
strobe and direction. The router asserts that only the owner writes to a
busy direction.

**Timing.** The numbers below are for an idle router.

- A flit written into an input at cycle t is at the FIFO head at t+1.
- The state machine leaves `IDLE` at t+1.
- The header is granted and written at t+2.
- The header is at the output FIFO head at t+3.
- The tails then follow one per cycle.
- After a release, the direction can be granted again one cycle later.
  A stream of messages through one output therefore uses 11 cycles per
  10 flits.

## Flow control and links (`xcvr_link`)

Each hop uses two `xcvr_link`s, one per direction. A link is a behavioural
stand-in for a serial transceiver, reduced to what the network sees:

- A flit accepted on `tx_valid`/`tx_ready` reaches the link's 64-word
  receive FIFO `LATENCY` cycles later (13 by default).
- The receive FIFO reads out only while the receiving router input is
  ready, that is, not nearly full.
- The sender is paused while flits in flight plus flits stored would fill
  the receive FIFO.

No flit is ever lost. Congestion therefore propagates back, hop by hop,
from a full router input to the sending node. The link sees the far end's
fill level with no delay. A real link would need a larger margin for the
round trip.

## Traffic nodes (`dummy_processor`)

Each node is built from a chain of blocks:

1. **16 `neural_engine`s.** Each sweeps its 32,000 neurons one per cycle
   (512,000 per node). For each visited neuron, a 16-bit LFSR value, XORed
   with a per-node salt, is compared with `fire_rate`. If it is below,
   the neuron spikes. So `fire_rate / 65536` is the spike probability per
   neuron and time step. A pending event pauses the sweep.
2. **`aer_merge`.** It takes one event per cycle from the engines in
   round-robin order.
3. **`packet_interface`.** It buffers up to 16 events. It sends a message
   whenever at least one event is buffered and the previous message has
   gone. Flits leave at the node's injection ratio, set in percent by a
   credit counter. At 100 % a flit leaves every cycle, and consecutive
   messages have no gap.

The receive side always accepts. It checks that each message is a header
addressed to this node followed by tails `0001..1001`. It counts messages
and errors, and it accumulates header latency (arrival time minus the send
time in the header) as a sum and a maximum.

The engines are random spike sources only. There is no membrane
integration: leaky integrate-and-fire dynamics are not modelled.

## Measuring latency

The top gives two latency measures:

- **Per-node statistics.** `rx_lat_sum` and `rx_lat_max` are kept for
  every header a node receives, measured from the send time in the header.
  The time base is one free-running counter shared by all nodes, which is
  possible because the design has one clock.
- **Probe (`latency_counter`).** It latches the next header sent by node
  `probe_src` and counts cycles until a header with that source and
  sequence number reaches any node. It then reports the count on
  `probe_latency`/`probe_valid` and takes the next header.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `N_NODES` | `hiaer_system` | 128 | number of nodes, multiple of 8, up to 128 |
| `DEPTH` | `hiaer_system`, `hiaer_router`, `flit_fifo` | 1024 | router FIFO words (4096 is the other evaluated size) |
| `AF_LEVEL` | same | 1012 | nearly-full threshold |
| `LINK_LATENCY` | `hiaer_system` (`LATENCY` in `xcvr_link`) | 13 | link flight time in cycles (at least 2) |
| `RX_DEPTH` | `xcvr_link` | 64 | link receive FIFO words |
| `NEURONS` | `hiaer_system`, `dummy_processor`, `neural_engine` | 32000 | neurons per engine |
| `LEVEL`, `INDEX` | `hiaer_router`, `routing_logic` | 1, 0 | place of a router in the tree |
| `SEED` | `hiaer_router`, `stochastic_arbiter`, `neural_engine` | fixed | LFSR seeds |

Shared constants (flit width, port count, control codes, header layout)
are in `noc_pkg`.

## What follows the published design and what does not

These points follow the published design:

- The tree of nine-port routers with level and index parameters.
- The 128-node scale and level-2 routers that talk to each other.
- The range tests and port fields of the level-1 and level-2 decode.
- 64-bit flits, one header and nine tails, with control codes
  `0000`/`0001`..`1001`.
- The destination in `[63:57]`.
- Store-and-forward input FIFOs of 1024 words with a 1012-word stop
  threshold that holds back the link's receive FIFO.
- Per-input routing logic and read/write state machines with the states
  idle, read/write and deterministic.
- Arbiters that favour the fullest input FIFO and break ties at random.
- Sixteen LFSR-driven engines per node with 512,000 neurons.
- A single 100 MHz clock.
- The counter-based latency measurement.

These are this design's own choices:

- Header fields other than the destination, and the event slot layout.
- The arbitration rule's exact form. The fullest requester always wins,
  and 3 random bits break ties. The published arbiter is described only
  as choosing stochastically by fill level, with the fullest more likely.
- A direction is held for a whole message, with a one-cycle gap between
  messages.
- The output FIFOs have the same depth as the input FIFOs.
- A stray tail at an input is dropped.
- The round-robin merge of engine events.
- The credit-based injection-ratio limiter.
- The link model: a fixed flight time, a 64-word receive buffer and a
  lossless pause.
- The shared time base.

These parts are not built:

- Fan-out by replicating a message inside a router. The published system
  replicates messages at level 2 to reach every node, but no broadcast
  address or replication rule is defined for it. This network routes
  unicast only.
- The level-3 router of a larger system. The decode supports it.
- The engines' integrate-and-fire dynamics.
- The serial transceivers themselves.
- The round-robin arbiter that served as the comparison baseline.

The stochastic arbiter here has 37 flip-flops, not 53 as in the published
one.

## Files

`rtl/`:

- `noc_pkg.sv`: constants and flit types.
- `flit_fifo.sv`: fall-through FIFO with count and nearly-full flag.
- `routing_logic.sv`: destination decode.
- `stochastic_arbiter.sv`: per-output arbiter and direction lock.
- `rw_controller.sv`: per-input read/write state machine.
- `crossbar.sv`: 9x9 switch.
- `hiaer_router.sv`: the router.
- `neural_engine.sv`, `aer_merge.sv`, `packet_interface.sv`,
  `dummy_processor.sv`: the traffic node.
- `xcvr_link.sv`: link model.
- `latency_counter.sv`: probe.
- `hiaer_system.sv`: the top.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. It also
has `tb_hiaer_system_full.sv`, which runs the top at its defaults.
`tb_system_checks.svh` holds the stimulus and checks shared by the two
system testbenches. `tb_sequential_injection.sv` runs the latency-versus-load
experiment described below. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

## Simulating

Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_hiaer_router.sv \
          --top-module tb_hiaer_router -o sim --Mdir obj
obj/sim
```

Swap in any testbench name. Modules are found by file name through `-Irtl`.
The system testbenches also need `-Itb` for their include file.
`tb_hiaer_system` simulates 32 nodes with 64-word FIFOs and 8-neuron
engines. It builds in well under a minute and runs in a few seconds.
`tb_hiaer_system_full` elaborates all 18 routers at full size. Its C++
build takes about five minutes on one core; the run itself takes under a
minute.

What the system tests drive and check:

- **Phase 1, fan-in.** Every node sends to node 2 at 100 % injection, then
  the network is drained.
- **Phase 2, neighbour traffic.** Every node sends to node n+1. At 128
  nodes, every fourth node also sends across to the other half.
- **After each phase:** every sent message must have arrived, intact, at
  its addressed node.
- **Mechanisms.** Each of the following must happen at least once, and the
  testbench reports how often it did:
  - contention for an output;
  - a grant that went to other than the lowest-numbered requester;
  - input back-pressure;
  - an output too full to accept a header;
  - a paused link;
  - traffic through level 2;
  - traffic between the two level-2 routers (at 128 nodes);
  - latency probe samples.

`tb_sequential_injection` repeats the published latency-versus-load
experiment on 16 nodes with 64-word FIFOs. Every node addresses node 2.
Node 0 starts alone at 100 % injection, and every 2000 cycles one more
node joins. For each step it prints the mean header latency of the
messages node 2 received once the new load had settled. A typical run
goes from about 30 cycles with one sender to about 250 with two, and
about 1000 with nine. It then levels off below 2000 cycles with fifteen,
because full FIFOs pause the senders instead of queuing more. The checks:

- the link into node 2 stays busy at least 90 % of the time once two nodes
  send;
- latency with three or more senders is above the single-sender value;
- latency stays bounded by the FIFO depths on the path;
- every message arrives after the drain.
