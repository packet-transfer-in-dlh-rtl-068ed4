# A cut-through router for Double-Loop Hypercube networks

A Double-Loop Hypercube (DLH) network joins 256-node hypercubes into two
rings. The hypercube numbers run along each ring, and the two rings are
linked to each other. Every node has a router with 12 full-duplex channels:

- 8 hypercube dimensions;
- 1 channel to the same node on the other ring (the *loop* channel);
- 2 channels to the neighbouring hypercubes along the ring (*L* and *R*);
- 1 channel to the router's own processing node.

This RTL implements one such router. It uses **cut-through flow control**.
Flow control works on whole packets, never on single flits. Every queue holds
exactly one packet, so a packet is only sent when a whole queue is free to
take it. Once sent, its flits stream through the router without gaps. The
header can leave on the output link while the tail is still arriving.

The router is input-buffered. Each input channel has eight single-packet
queues, and every queue connects straight to the crossbar. So one input
buffer can feed several outputs at the same time. Output channels are the
only place where packets compete.

## Packets and the header flit

All links and queues are 34 bits wide: a 2-bit flit type and a 32-bit flit.
A packet is one header, zero or more body flits and one tail. Only the header
is routed. The others follow it.

| bits  | field      | meaning |
|-------|------------|---------|
| 33:32 | TF         | flit type: `01` header, `10` body, `11` tail (`00` unused) |
| 31    | LOOP       | dT: the destination is on the other ring |
| 30    | L          | dT: move along the ring in direction L |
| 29    | R          | dT: move along the ring in direction R |
| 28:21 | DIF_BCH    | dT: node-address bits that still differ (one per hypercube dimension) |
| 20    | EI         | destination ring (external / internal) |
| 19:8  | DL_Network | destination hypercube on the ring |
| 7:0   | BCH        | destination node inside its hypercube |

Bits 31:21 together are the **mismatch field dT**. Each of its 11 bits stands
for one outgoing channel:

- DIF_BCH bit *i* is hypercube channel *i* (channels 0..7);
- LOOP is channel 8;
- L is channel 9;
- R is channel 10.

Channel 11 is the own node. A high dT bit means "moving through this channel
brings the packet closer". Every such move is on a minimal path. So
**adaptive minimal routing** is simple: request every channel whose dT bit is
high, and take whichever is granted. See `dlh_pkg.sv` for the numbering and
the types.

## How a header is routed

Three comparators (`header_compare`) check the destination against the
router's own address register. They compare the ring bit, the hypercube
address and the node address separately. If all three match, the queue
requests only the own-node channel. Otherwise it requests the channels of
its high dT bits. Two of these requests are also masked:

- L and R are requested only while the hypercube address still differs;
- LOOP is requested only while the ring bit differs.

The ring direction (L or R) comes from the sender and stays in the header
until the packet reaches its destination hypercube.

When the header leaves, `dt_modify` rewrites dT for the router the packet is
going to. Channel *c* leads to a node whose address is this router's address
with one bit changed:

- for a hypercube channel, node-address bit *c* is inverted;
- for the loop channel, the ring bit is inverted.

The new dT is that node's mismatch with the destination:

    DIF_BCH' = BCH xor OWN.HYPERCUBE xor onehot(c)      (c < 8)
    LOOP'    = EI  xor OWN.EI        xor (c == 8)
    L', R'   = L, R and not (DL_Network == OWN.DL_Network)

The other 23 bits pass unchanged, as do body and tail flits. A multiplexer
under `MOD_DT` picks the new dT for the first flit of a packet only. No flit
is changed on the own-node channel.

Where a packet starts, its node must fill in dT the same way. The node sets
DIF_BCH to source xor destination, LOOP if the rings differ, and one of L or R
if the hypercubes differ. The sender chooses the direction, so this router
does not need the ring's size.

## The three-stage pipeline and its timing

| cycle | stage | what happens to the header |
|-------|-------|----------------------------|
| t     | 1. flit write | written into the selected queue of its input buffer |
| t+1   | 2. routing, arbitration, path setting | requests, grants and one accept |
| t+2   | 3. switch traversal | read through the crossbar, dT rewritten, loaded into RG_OUT |
| t+3   | — | on the output link (`out_valid`) |

Body and tail flits skip stage 2. Each one is read the cycle after the flit
before it, so a packet of *n* flits occupies the output link for *n*
back-to-back cycles. When the tail is read, the queue and the output channel
are free again. A new match on that output can form in the next cycle.

### Link utilization

A link is idle for exactly two cycles between two packets. The next router's
PACK_WAIT returns in the cycle after the tail has arrived. Then one cycle of
arbitration and one of switch traversal follow before the next header is on
the link. A stream of packets of *n* flits therefore uses an output link
*n*/(*n*+2) of the time: 80 % for 8-flit packets. Every output reaches this
rate at the same time, because each queue has its own path through the
crossbar. `tb_router_utilization` measures both cases.

## Allocation: one iSLIP iteration per cycle

`allocator` holds one `queue_arbiter` per queue (96 of them) and one
`rr_arbiter` per output channel (12). They all work in parallel:

1. **Request.** Every queue that holds a header and has no match yet
   requests all the outputs its header allows.
2. **Grant.** Every output RRA whose channel is free grants one request: the
   first one at or after its pointer PTR, wrapping round. A channel is free
   when it is not carrying a packet and the next router shows PACK_WAIT high
   and CHAN_BUSY low.
3. **Accept.** Every queue with one or more grants accepts one. It prefers an
   output whose next router reports a lightly loaded input (CHAN_LOAD low).
   Among equals it takes the lowest channel number.

An accepted grant connects that queue to that output. The output's PTR then
moves to one past the queue. A grant that was not accepted leaves PTR where
it was. This is the iSLIP rule, and it spreads the outputs' pointers apart
over time.

A single iteration leaves some pairs unmatched. For example, an output whose
grant went to a queue that took another output stays free for that cycle. It
tries again in the next cycle. Only headers are arbitrated, so this costs one
cycle now and then, not one cycle per flit.

## The input buffer and link flow control

Each input channel has an `input_buffer` with eight `fifo_queue`s. Every
cycle, the busy flags of the queues are copied into the register
`B_FIFO_STATUS`. A priority encoder (`prio_enc`) picks the first free queue
from that register.

The buffer reports its state to the previous router:

| signal    | meaning |
|-----------|---------|
| PACK_WAIT | a queue is free and no packet is being received: a packet may start |
| CHAN_BUSY | all eight queues are busy |
| CHAN_LOAD | only one or two queues are free (heavily loaded) |
| DATA_ACK  | one-cycle pulse after a packet's tail was written |

**A sender may start a packet only while PACK_WAIT is high, and then sends
all its flits on consecutive cycles.** PACK_WAIT can only go low through
traffic on the same link. So a router that sees PACK_WAIT at match time can
rely on it until its header arrives two cycles later. A header that arrives
while PACK_WAIT is low is dropped and flagged on `in_drop`.

Each queue (`fifo_queue`) holds one packet of up to `DEPTH` flits. It has a
write counter with a decoder, a read counter with a multiplexer, and
`CNT_EQU` when the two counters are equal (nothing left to read). A write and
a read can happen in the same cycle. Reading the tail clears the queue.

## Modules

| module | role |
|--------|------|
| `dlh_pkg`        | widths, channel numbers, flit type codes, header structs |
| `dlh_router`     | top: own-address register, 12 input buffers, allocator, crossbar, 12 output channels |
| `input_buffer`   | queue pool, B_FIFO_STATUS, priority encoder, decoder, demultiplexer, PACK_WAIT / CHAN_BUSY / CHAN_LOAD / DATA_ACK |
| `prio_enc`       | first free queue |
| `fifo_queue`     | single-packet queue with CNT_WR, CNT_RD, CNT_EQU and flag B |
| `allocator`      | all queue arbiters and output RRAs, request / grant / accept wiring |
| `queue_arbiter`  | request forming from the header, accept by neighbour load |
| `header_compare` | the three address comparators |
| `rr_arbiter`     | output round-robin arbiter with STATE, PTR and MOD_DT |
| `crossbar`       | 96-to-12 flit switch and the returning read strobes |
| `output_channel` | reads the connected queue, RG_OUT, output link |
| `dt_modify`      | rewrites dT of the header for the chosen channel |

### Top-level ports (`dlh_router`)

Parameters:

- `NQ` = 8: queues per input.
- `DEPTH` = 8: flits per queue.

The channel count is fixed at 12 by the address format.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `init`, `own_adr_in` | in | 1, 21 | loads the own address register |
| `in_valid`, `in_data` | in | 12, 12 x 34 | input links |
| `in_pack_wait`, `in_chan_busy`, `in_chan_load`, `in_data_ack` | out | 12 each | input-buffer state, to the previous routers |
| `in_drop` | out | 12 | a header arrived while PACK_WAIT was low |
| `out_valid`, `out_data` | out | 12, 12 x 34 | output links (RG_OUT) |
| `ds_pack_wait`, `ds_chan_busy`, `ds_chan_load` | in | 12 each | input-buffer state of the next routers |

## Design choices not fixed by the architecture

These parts are this design's own choices. They are the first places to look
when adapting it.

- **One clock.** Links are written in the router's clock domain. The
  sender's write strobe is folded into `VALID_DATA`. A real asynchronous link
  needs a synchronizer or a clock-domain-crossing FIFO in front of each input
  buffer.
- **Queue depth.** A queue holds L+2 flits, and L is open. `DEPTH` = 8
  (L = 6) is assumed. Packets longer than `DEPTH` are not supported: the
  extra flits are dropped and an assertion fires.
- **Flit type codes, channel numbering, and the meaning of DATA_ACK.**
- **The dT rewrite equations above.** The architecture fixes the parts:
  XOR of the own node address with BCH, XOR/AND with the LOOP and L/R
  comparison results, and an 11-bit multiplexer under MOD_DT. Putting the
  chosen channel into the XOR, so that dT is exact at the next router, is
  this design's reading.
- **Accept tie-break:** lowest channel number after the CHAN_LOAD preference.
- **Status register timing.** `B_FIFO_STATUS` is rewritten every cycle, so a
  freed queue becomes selectable one cycle after it is freed.

What is not here:

- the processing node;
- the network wiring between routers;
- the algorithm that picks the ring direction at the packet's source.

The router works with any source that fills in dT as described.

## Verification

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb_dlh_router` runs the whole router at its default size with 12 senders
and 12 next-router models. It sends 622 packets:

- single packets, checking the three-cycle header latency;
- one packet on each kind of channel;
- a blocked output that fills an input buffer until CHAN_BUSY;
- packets whose route is steered by neighbour load;
- 600 random packets on all inputs.

Every packet is checked against a scoreboard. The checks are:

- it leaves on a channel its header allows;
- its length and body are unchanged;
- its header carries the dT expected for that channel, computed in the
  testbench from node addresses.

The test also counts how often each mechanism happens, and fails if one
never does:

- own-node, hypercube, loop and ring delivery;
- multi-route headers;
- steering by CHAN_LOAD;
- output contention;
- stalls on a busy next router;
- one input feeding two outputs at once;
- cut-through (a header leaving before its tail arrived);
- CHAN_LOAD and CHAN_BUSY;
- round-robin wrap-around.

`tb_router_utilization`, also at the default size, streams 8-flit packets
two ways. First, from three inputs into one output. Second, from every input
to a different output. It checks that each link carries every flit at
exactly 8/10 utilization.

`tb_dlh_network` wires eight routers into a small DLH network. It has
two-node hypercubes, two hypercubes on each ring and two rings, so every kind
of channel is used. Each node sends a packet to every node, then 400 random
packets are added. Every packet must arrive once, unchanged, at its
destination's own-node channel. The total number of headers seen on the
links between routers must equal the sum of the minimal distances. This
shows that the dT rewrite keeps each packet on a minimal path hop by hop.

The router also holds two assertions: no queue is connected to two outputs,
and no packet is longer than a queue.

To simulate, with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/dlh_pkg.sv rtl/dlh_router.sv \
        tb/tb_dlh_router.sv --top-module tb_dlh_router
    ./obj_dir/Vtb_dlh_router

Replace the names to run another block's testbench. For example,
`rtl/rr_arbiter.sv tb/tb_rr_arbiter.sv --top-module tb_rr_arbiter`.
