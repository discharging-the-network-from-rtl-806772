# Proactive buffer reservation for a three-stage Clos fabric

A switching fabric built from small-buffer switches usually protects its
buffers with hop-by-hop backpressure. When one output is oversubscribed,
that backpressure spreads upstream: shared queues fill with packets for the
congested output, and packets for idle outputs sit behind them
(head-of-line blocking, "saturation trees"). The other common answer, dropping
packets, trades that for retransmissions.

This design avoids both by **reserving buffer space before a packet enters
the fabric**. Every input adapter holds its packets in virtual output queues
(VOQs) and asks a scheduler for permission. The scheduler's *output arbiter*
for output j grants a packet only after it has reserved a slot for it in the
buffer in front of output j. So the traffic in the fabric heading to any
output never exceeds what fits in front of that output. The congestion stays
in the VOQs at the edge, where every flow has its own queue. The fabric
itself carries only traffic that can drain.

The RTL covers one complete organization of this scheme: a 64-port
three-stage Clos network of 8×8 buffered crossbars, with a **central
scheduler** and per-packet multi-path spraying.

## Why reserving only the last stage is enough

One might expect the first and second stages to need reservations too. They
do not, because every flow spreads its packets evenly over all M middle (B)
switches. Packet n of a flow goes through B switch n mod M. Look at one
fabric output with at most b packets admitted towards it. Each B switch
carries at most b/M of them. The M outputs of one C switch together put at
most M · b/M = b packets on any one B→C link. So the B-stage buffers cannot
overflow either. The A→B links carry a perfectly balanced load that never
exceeds the link rate.

This argument holds exactly for smooth (fluid) traffic. Real packets are
quantized, so short-term imbalances remain. Hop-by-hop credits therefore
stay in place on the ingress→A and A→B links. They act only
occasionally, on short-term imbalances. The
B→C and C→egress links need no backpressure at all. The C-stage crosspoints
are covered by the scheduler's reservations. The egress adapters never
refuse a packet.

## Topology and numbering

```
 ingress     A stage        B stage        C stage      egress
 adapters   (M switches)   (M switches)   (M switches)  adapters
   i  ──► A[i/M].in[i%M]
            A[s].out[l] ──► B[l].in[s]
                           B[s].out[l] ──► C[l].in[s]
                                          C[c].out[q] ──► egress c*M+q
```

* N = M² ports. The defaults are M = 8 and N = 64.
* Every switch is an M×M **buffered crossbar** (`xbar_switch`). Each
  (input, output) pair has its own crosspoint FIFO of `XP_DEPTH` = 12
  packets. Each output has a round-robin arbiter over its M crosspoints.
* Routing inside each stage:
  * A switch: by the packet's `route` field, which names the B switch.
  * B switch: by `dst / M`, the C switch.
  * C switch: by `dst mod M`.
* One packet time is one clock cycle. A packet (header plus a 16-bit payload
  tag) travels as a single `pkt_t` word. Links, requests, grants and
  credits are all one word with a valid bit per cycle (`fc_pkg`).

## The life of a packet

The central scheduler holds one `output_arbiter` per output and one
`input_arbiter` per input (`central_scheduler`). These are the steps for a
packet of flow i→j:

1. **Enqueue.** The host hands the packet to ingress adapter i
   (`in_valid`/`in_ready`). The packet lands in VOQ j.
2. **Request.** The adapter keeps two counters per flow: `pr` (pending
   requests) and `rg` (received grants). A flow may request while its VOQ
   holds packets not yet requested (`count > pr + rg`) and `pr < U`. A
   round-robin arbiter sends at most one request per cycle, and `pr` is
   then incremented.
3. **Reservation.** The request increments counter i→j in output arbiter j.
   Flow i→j is eligible when two counters are non-zero:
   * its request counter;
   * the credit counter of the C-stage crosspoint selected by its
     *distribution counter*, which is the B switch its next packet will use.

   Each cycle one eligible flow is served. Its request counter and that
   credit counter drop by one, and its distribution counter advances to the
   next B switch.
4. **Grant serialization.** Several output arbiters can grant the same input
   in one cycle. The grant increments counter i→j in input arbiter i. That
   arbiter forwards one grant per cycle, round robin, to adapter i. There,
   `pr` drops by one and `rg` rises by one. On an idle scheduler the grant
   is valid at the adapter 4 cycles after the request.
5. **Injection.** The adapter's link arbiter picks a flow with `rg > 0`. It
   also needs a hop-by-hop credit for the A-stage crosspoint the packet will
   use. The packet is stamped with:
   * its source;
   * its destination;
   * a `route` equal to the flow's **distribution pointer**;
   * a per-flow sequence number.

   The adapter's pointer for flow i→j and output arbiter j's distribution
   counter for input i both start at 0. Both advance once per packet of the
   flow, so they always name the same B switch. The grant therefore never
   has to carry the route.
6. **Through the fabric.** Each A-stage output holds one credit counter per
   downstream B crosspoint and sends only against a credit. Every crossbar
   returns freed-slot credits upstream, at most one per input line per
   cycle. B and C outputs send freely.
7. **Re-sequencing and credit return.** Packets of a flow use different
   paths and can arrive out of order. The `egress_adapter` tracks the next
   expected sequence number of each source. Each cycle it releases one
   packet that is now in order, and sends output arbiter j an end-to-end
   credit naming the packet's B switch.

   The credit goes back when the packet becomes in order, not when it leaves
   the C stage. So the scheduler bounds the re-sequencing buffer too: at
   most M · XP_DEPTH = 96 packets per output sit in the C-stage crosspoints
   and the re-sequencing buffer together.

On an empty 4-port fabric, the shortest time from acceptance at the host
interface to the egress link is 15 cycles.

### Visiting order of the output arbiters

If all output arbiters scanned inputs in the same round-robin order, they
could drift into step and keep granting the same inputs at the same time.
Grants would then pile up in the input arbiters, and credits would be tied
up waiting there. To avoid this, each output arbiter visits inputs in its
own fixed pseudo-random order. Position p maps to input (p·a_j + b_j) mod N,
where a_j is odd and a_j, b_j come from a fixed integer hash of j
(`fc_pkg::perm_mult`, `perm_add`). The output index arrives on the `out_id`
strap input. The mapping is a permutation only if N is a power of two.

## Bounds that keep the counters finite

| quantity | bound | why |
|---|---|---|
| request counter i→j (scheduler) | U | adapter never has more than U pending |
| grant counter i→j (scheduler) | U | grants come only from pending requests |
| `pr` per flow (adapter) | U | request throttling |
| `pr + rg` per flow (adapter) | VOQ_DEPTH | only queued packets are requested |
| C-stage slots + re-sequencing buffer per output | M·XP_DEPTH | end-to-end credits |
| uncredited packets per flow | M·XP_DEPTH = 96 < 256 | 8-bit sequence numbers cannot alias |

Assertions in the RTL flag any counter that would overflow. They also flag
crosspoint FIFO overflow or underflow, and a re-sequencing buffer that
runs full.

## Files

| file | what it is |
|---|---|
| `rtl/fc_pkg.sv` | message types (`pkt_t`, `req_t`, `gnt_t`, `hcred_t`, `ecred_t`), field widths, visiting-order hash |
| `rtl/rr_arbiter.sv` | round-robin arbiter used everywhere |
| `rtl/xp_fifo.sv` | crosspoint FIFO |
| `rtl/output_arbiter.sv` | per-output credit arbiter |
| `rtl/input_arbiter.sv` | per-input grant serializer |
| `rtl/central_scheduler.sv` | N output arbiters + N input arbiters |
| `rtl/ingress_adapter.sv` | VOQs, pr/rg, request and link arbiters, distribution pointers, sequence numbers |
| `rtl/xbar_switch.sv` | M×M buffered crossbar, A/B/C stage selected by `STAGE` |
| `rtl/egress_adapter.sv` | re-sequencing buffer and end-to-end credit return |
| `rtl/clos_fabric_central.sv` | top level |

### Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 8 | switch radix, number of switches per stage |
| `N` | M·M = 64 | ports |
| `XP_DEPTH` | 12 | packets per crosspoint buffer |
| `U` | 32 | pending requests allowed per flow |
| `VOQ_DEPTH` | 32 | packets per VOQ (this design's choice) |
| `ROB_SIZE` | 300 | re-sequencing buffer slots per egress adapter |

M must be a power of two, because the visiting order needs N to be one.
M is at most 16 and N at most 256, set by the widths in `fc_pkg`.

### Top-level interface

* Per port:
  * `in_valid`, `in_dst`, `in_payload` in; `in_ready` out. A packet is
    accepted in a cycle with `in_valid && in_ready`. `in_ready` depends
    combinationally on `in_dst`: is there room in that VOQ?
  * `out_pkt` out: packets leaving the fabric, in order per flow.
* Event outputs, which pulse when a mechanism acts and are meant for
  observation:
  * `ev_req_throttled`
  * `ev_credit_block`
  * `ev_serialize`
  * `ev_link_stall`
  * `ev_bp_stall_a`
  * `ev_reorder`
* Reset (`rst_n`) is asynchronous and active low. It clears every counter
  and sets credit counters to their buffer sizes.

## Where this RTL departs from the scheme as described

* **Control transport.** Requests, grants and end-to-end credits use
  direct wires between the adapters and the scheduler. The scheme routes
  them through the A and C switch chips to save scheduler pins. That only
  adds latency and pins; it does not change function.
* **Timing.** Every stage is one register, so the pipeline is shorter than
  the 12-packet-time credit loop assumed in the scheme's performance
  figures. Real link and chip delays would lengthen every loop. The
  buffer sizes (12-packet crosspoints, U = 32) are meant for that longer
  loop.
* **Finite VOQs.** The scheme treats VOQs as unbounded. Here each holds
  `VOQ_DEPTH` packets, and the host sees `in_ready` low when the VOQ is full.
* **One credit per request message.** A request could ask for several
  credits; here it asks for one.
* **One priority class.** Flows are (input, output) pairs.
* **Re-sequencing buffer organization.** The buffer is a set of
  associatively searched slots. It releases one in-order packet per cycle
  and returns its credit in the same cycle.
* **Not built:**
  * the **distributed scheduler**, the scheme's scalable alternative. It puts
    the output arbiters in the C switches and routes requests and grants
    over a multi-path scheduling network with shared, credit-controlled
    queues.
  * the **weighted round-robin** output arbiter that gives weighted max-min
    fair shares. The output arbiters here are plain round robin.

## Verification

Each block has a self-checking testbench in `tb/` that uses a reference
model or scoreboard. Every testbench prints
`TB_RESULT checks=<n> failures=<n>`.

| testbench | checks |
|---|---|
| `tb_output_arbiter` | grants only with requests and credit; route equals the predicted distribution pointer; grants stop at M·XP_DEPTH without credit return and resume with it |
| `tb_input_arbiter` | a 4-grant burst drains one per cycle after a 2-edge latency; nothing is lost or invented |
| `tb_central_scheduler` | 4-cycle request-to-grant latency; no crosspoint over-reserved; a slow-draining hotspot output is credit-limited while all requests are eventually granted |
| `tb_ingress_adapter` | source, destination, payload order, sequence numbers and routes of every injected packet; never more than U pending; no injection without a grant and an A credit |
| `tb_xbar_switch` | A-stage routing, per-pair order, downstream credit discipline, backpressure stalls, upstream credit limits; C-stage routing by dst mod M |
| `tb_egress_adapter` | in-order delivery per source from randomly reordered arrivals; one credit with the right route per departure |
| `tb_clos_fabric_central` | end-to-end scoreboard: every packet delivered once, in order, intact; see below |
| `tb_fabric_workloads` | saturated unbalanced traffic and sequential fan-in on a 4-port fabric with every other parameter at its default |

The end-to-end test runs in three phases:

1. uniform traffic;
2. hotspot traffic: 40% of every input's packets go to outputs 0 and 1,
   which oversubscribes them several times over;
3. a drain phase.

During the hotspot phase it also checks that traffic to the other outputs
still gets through. It counts every mechanism listed above, and fails if
any of them except A-stage backpressure never acts.

`tb_fabric_workloads` offers saturated traffic in which each input sends a
fraction w of its packets to "its own" output and the rest uniformly. For
w = 0, 0.5 and 1 it measures 0.97 to 1.0 packets per output per cycle; the
test requires at least 0.9. It then makes each output in turn a hotspot,
with 2.4 times its capacity demanded, on top of 0.5-load background
traffic. The hotspot stays about 99% busy. The background traffic keeps
being delivered as fast as it is accepted.

The end-to-end test runs at M = 2 (4 ports), because Verilator builds the
flattened fabric slowly. The same test has also passed at M = 4 (16 ports),
but that build takes several minutes. The default 64-port configuration
compiles cleanly under lint and elaboration. It has not been simulated.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/fc_pkg.sv rtl/*.sv \
    tb/tb_clos_fabric_central.sv --top-module tb_clos_fabric_central
./obj_dir/Vtb_clos_fabric_central
```

To change the end-to-end size, edit the `localparam` line at the top of
`tb/tb_clos_fabric_central.sv`.
