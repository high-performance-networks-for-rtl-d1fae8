# An on-chip network for a tiled dataflow processor

A dataflow processor fires an instruction as soon as its operands are
present, so nobody knows ahead of time when or where network capacity will be
needed: traffic is bursty, there is no cycle to spare for reserving
resources, and, unlike most networks, a message that has reached its
destination is not guaranteed to be consumed, because a processing element
whose operand buffers are full may be waiting for some *other* operand. This
RTL is a network for such a processor, built around four ideas:

* **Stop-channel links.** A sender never asks first. It sends, keeps a copy,
  and learns one cycle later whether the receiver took the message. A
  rejected message is simply sent again.
* **Adaptive routing with two virtual channels.** Operands travel in an
  *adaptive* channel and may go around congestion; a *deterministic*
  (dimension-order) channel is the escape route that keeps the network free
  of deadlock.
* **Eviction to memory.** When a cluster's input queue is stuck full, it
  pushes one operand out to memory over channels reserved for memory
  traffic. Memory always accepts, so this always makes progress; it prefers
  right-hand operands, so a waiting left/right pair cannot chase each other
  forever.
* **A torus with relays.** Clusters are joined as a torus (a grid is a
  parameter away); each long wrap-around link is cut in two by a relay so
  that every sender is exactly one cycle from its receiver.

The default configuration is a 4 x 4 torus, two messages per link per cycle
in each direction, two operand channels per port, and queues two entries
deep.

## Messages and links

A message is 160 bits and crosses a link whole in one cycle: 128 data bits
and a 32-bit header (`noc_pkg::msg_t`):

| field | bits | use |
|---|---|---|
| `kind` | 2 | operand (`K_DATA`), evicted operand going to memory (`K_TOMEM`), returned by memory (`K_FROMMEM`) |
| `vc` | 2 | channel to write at the receiving port |
| `det` | 1 | routed by dimension order from now on |
| `right` | 1 | right-hand operand |
| `dr` | 3 | dimension reversals so far |
| `dst_x/y`, `src_x/y` | 4 x 3 | cluster coordinates (up to 8 x 8) |
| `tag` | 11 | operand tag, carried untouched |
| `data` | 128 | operand |

A link is `LANES` independent lanes per direction. Forward, each lane is a
`flit_t` (`valid` + message). Backward, each lane has an `rsp_t`
(`acc`, `rej`), registered at the receiver, so it answers the message of
the previous cycle.

Sender (`stop_tx`): the message to send sits in `hold` and is driven on the
lane. At the clock edge it moves to `infl` (the retransmit copy). If the
answer that arrives next cycle is a reject, the copy is swapped back into
`hold` and goes out again; in that cycle the lane reports `free = 0` and
takes nothing new. So a rejected message is resent two cycles after its
first try, and a message sent later on the same lane may overtake it: lanes
do not keep order, and nothing in the network relies on order.

Receiver (`input_port`): each message names its channel; a channel accepts
at most one message per cycle and none when full. Lanes are served in
order, so when both lanes carry a message for the same channel the second is
rejected and retried.

## The switch

`network_switch` has six ports: N, E, S, W, LOC (the cluster) and MEM
(memory channels). Every input port holds four channels, `vc_queue`s of
`QDEPTH` entries:

| channel | carries | routing |
|---|---|---|
| `VC_DET` | operands that have fallen back to dimension order | x then y |
| `VC_ADAPT` | operands routed adaptively | selection function |
| `VC_TOMEM` | evicted operands on their way to memory | x then y |
| `VC_FROMMEM` | operands coming back from memory | x then y |

A hop takes two cycles. In the first, the message is written into its
channel. In the second, every channel head is routed by its own
`route_unit`, and for each output port the allocator walks the 24 channel
heads round robin from a per-port pointer, giving each one that wants this
port the next free output lane. A granted head is popped into the lane's
`hold` register and is on the wire in the following cycle. Through an idle
network an operand therefore needs 2 cycles per switch plus one cycle in the
destination's input queue: 5 cycles from injection to the cluster for one
hop, 7 for two hops, and 2 more for each relay.

## Adaptive routing

This is the part that needs the most care. Every operand carries a
*dimension-reversal* count: how many times it has moved in a direction that
dimension-order routing would not have taken.

For a head of the adaptive channel, `route_unit`

1. takes the four directions N, E, S, W, drops the one the message came
   in on (and, on a grid, any that leaves the array);
2. ranks the rest by the distance from that neighbour to the destination
   (torus distance on a torus), ties going first to the dimension-order
   direction, then to the lower port number;
3. asks each neighbour, in that order, whether its adaptive channel is
   *available*: it has a free entry **and** every message queued in it has a
   dimension-reversal count strictly greater than this message's (an empty
   channel qualifies);
4. sends the message to the first available one, still in the adaptive
   channel, adding one to its count if that direction is not the
   dimension-order one;
5. if none is available, marks the message `det` and sends it in the
   dimension-order direction in the deterministic channel. It stays there,
   and on dimension order, until it arrives, unless a broken link is in
   the way (see "Broken links").

Because the candidates are ranked by distance, the router takes the shortest
way when the network is quiet and detours when the shortest way is busy.
Step 3 is what prevents cycles of waiting among adaptive messages:
a message only ever waits behind messages that have detoured more often than
it has. A message cannot detour without limit: past `MAX_DR` reversals only
the dimension-order direction is still offered adaptively.

The neighbours' status (`adapt_status_t`: space, empty, lowest count) comes
over sideband wires beside each link, one register behind on wrap-around
links. It is a snapshot; if two switches pick the same free entry, one of
them is rejected and retries, which stop-channel flow control already
handles.

Memory traffic always uses dimension order in its own two channels, so it can
never be blocked by operands. At the destination an operand leaves on LOC,
a to-memory message leaves on MEM at the memory node.

## Broken links

A router never sends on a link marked broken: to the route computation it
looks like a neighbour that does not exist. Adaptive operands simply pick
another candidate. Traffic that must follow dimension order cannot do that,
so it bends instead. A deterministic or memory message whose x link is
broken moves in y first if it still has y distance to cover. A deterministic
operand otherwise rejoins the adaptive channel when the
selection function finds a route. Failing that, it takes the open direction
nearest its destination, never straight back. A detour forced this way is
allowed even past `MAX_DR`, and the count then stops at 7. If nothing is
open, the message waits.

## Breaking dataflow deadlock

An operand that has arrived can still be stuck: the cluster may refuse it
until its partner arrives, and the partner may be queued behind it. The
input queue, `eject_queue`, therefore watches itself. When it has been full
for `TIMEOUT` cycles without the cluster taking an operand, it removes one
entry and sends it, rewritten as `K_TOMEM` addressed to the memory node and
with its own coordinates as source, through lane 0 of its switch's MEM port.
The memory node hands it to the L2 on `mem_out`; the L2 sends it back on
`mem_in` as `K_FROMMEM` addressed to that source, and the input queue stores
it as an ordinary operand again.

Which entry: the oldest right-hand operand, and the head only if no
right-hand operand is queued. Right-hand operands thus circulate faster
than left-hand ones, and two operands of a pair that keep missing each other
eventually meet.

## Torus wrap-around links

On a torus, switch (C-1, y) reaches (0, y) going east, and likewise in the
other dimension. These links are long, so each one (each direction) goes
through a `link_relay`: per lane a two-entry buffer that answers like a
switch input and a `stop_tx` that sends like a switch output. The relay adds
two cycles and does not look inside messages.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | message, link and status types; channel and port numbers |
| `rtl/dataflow_noc.sv` | top: the array, relays, input queues, memory attachment |
| `rtl/network_switch.sv` | one router |
| `rtl/input_port.sv` | receiving side of a link, four channel queues |
| `rtl/vc_queue.sv` | one channel queue, reports its lowest reversal count |
| `rtl/route_unit.sv` | dimension-order and adaptive route computation |
| `rtl/stop_tx.sv` | sending side of one stop-channel lane |
| `rtl/link_relay.sv` | relay for wrap-around links |
| `rtl/eject_queue.sv` | cluster input queue with eviction |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/l2_model.sv` | behavioural memory for the testbenches |

## Top-level interface

`dataflow_noc` numbers clusters `n = y*C + x`.

* `pe_in[n][lane]` / `pe_in_rsp[n][lane]`: a cluster injects like any stop-channel
  sender (a `stop_tx` per lane does it). Set `vc = VC_ADAPT`, `det = 0`,
  `dr = 0`, `kind = K_DATA`, destination and source coordinates.
* `pe_valid[n]`, `pe_msg[n]`, `pe_ready[n]`: operands for the cluster.
* `mem_out` / `mem_out_rsp`: to-memory messages leaving the memory node's MEM
  port (all lanes). The memory must accept them.
* `mem_in` / `mem_in_rsp`: one stop-channel lane back from memory, entering
  lane `LANES-1` of the memory node's MEM port. Returned messages must be
  `K_FROMMEM`, `vc = VC_FROMMEM`, addressed to the message's source.
* `evict_event[n]`: one-cycle pulse per eviction.
* `link_fault[n][d]`: marks the link leaving cluster `n` towards `d`
  (0 = N, 1 = E, 2 = S, 3 = W) as broken. Set both directions of a physical
  link. Hold it constant while traffic flows.

Reset is asynchronous and active low; it empties every queue and register.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `R`, `C` | 4, 4 | rows and columns of clusters (at most 8 each with 3-bit coordinates) |
| `TORUS` | 1 | 1: torus with relays; 0: grid, edge ports unused |
| `LANES` | 2 | messages per link per cycle per direction (at least 2 at the top) |
| `QDEPTH` | 2 | entries per channel queue |
| `IQ_DEPTH` | 4 | entries of each cluster input queue |
| `TIMEOUT` | 16 | full-and-stalled cycles before an eviction |
| `MAX_DR` | 3 | dimension reversals allowed |
| `MEM_X`, `MEM_Y` | 0, 0 | cluster where memory is attached |

The link bandwidth, queue length and topology defaults are the design's
chosen operating point. Its studies found little gain beyond two lanes, two
channels and two to four entries, and found that splitting a message over
several narrower transfers costs a lot (20% at half width), so links are a
full message wide. `IQ_DEPTH`, `TIMEOUT`, `MAX_DR` and the memory location
are choices of this implementation.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dataflow_noc \
    -y rtl -y tb +libext+.sv -Irtl rtl/noc_pkg.sv tb/tb_dataflow_noc.sv
./obj_dir/Vtb_dataflow_noc
```

`tb_dataflow_noc` runs the default 4 x 4 torus with no parameter changes,
in under a minute. It checks the 5/7/7-cycle latencies above (one hop, two
hops, one wrap-around hop). It then runs about 7,000 operands of random
traffic with one cluster stalled for 1,500 cycles. Every operand must arrive
once, unchanged, at its destination. It counts and requires each mechanism:
rejections, dimension reversals, fallbacks to the deterministic channel,
relay traffic, both lanes of a link busy at once, evictions of right-hand
operands, memory returns, and operands that had to go around the one link
the test marks broken (the link itself must stay idle).
`tb_dataflow_noc_grid8` repeats this on an 8 x 8 grid (about two minutes).
The module testbenches check each block
against an independent model: exhaustive route checks on a 4 x 4 torus and
grid with randomly broken links, and random traffic for the queues, lanes, relay, input queue and
switch.

## Where this departs from, or goes beyond, the design

* The number of channels is fixed: two operand channels (one adaptive, one
  deterministic) and two memory channels per port. Other channel counts
  would need more route classes.
* Where memory attaches on a torus is not given; one node is used.
* The eviction trigger, the input-queue depth and the relay's buffer are
  this implementation's own.
* Dimension-order routing in the deterministic channel crosses the
  wrap-around links without a dateline or a second escape channel. Under
  very heavy load, the deterministic channels around a ring could in
  principle wait on each other in a cycle. The tests have not shown it.
* How known link failures are learned is not defined; here they are a static
  input. How deterministic traffic detours around a broken link is also this
  implementation's own rule (see "Broken links"), and it is not proved
  deadlock free.
* The dimension-order-only baseline with a single queue per port is not
  included. It is what the design replaces.
* The area and timing figures that came from synthesis and place-and-route
  in a 130 nm flow are not reproduced.
