# HPCC congestion control in SystemVerilog

RDMA networks run at 25–400 Gbit/s with microsecond round trips, and their
classic congestion controls react to coarse signals: an ECN mark, a delay
sample, a pause frame. They need many round trips and many tuned knobs to settle,
and meanwhile queues grow. HPCC takes a different route. Every switch on the
path writes the exact state of its egress port into each data packet as it
leaves: the port speed, a timestamp, a running byte count and the queue
length. The receiver echoes these records back in the ACK. With them the
sender can work out how many bytes are in flight on each link. It then sets
its window so that the busiest link on its path carries just below its
capacity, about 95 %, in one step instead of probing toward it.

This repository holds RTL for both halves:

* the **NIC side**: a congestion-control (CC) engine that runs the HPCC
  sender algorithm per ACK, a flow scheduler that paces hundreds of flows,
  and transmit/receive pipes that make and answer packets;
* the **switch side**: an egress port that appends the per-hop record
  (in-band network telemetry, INT) to departing data packets.

The default configuration is a 25 Gbit/s NIC port with 300 flows, a 5 ns
clock, a base round-trip time T of 9 µs and a 100 Gbit/s switch port.

## Structure

```
hpcc_nic
  MAC rx -> hpcc_rx_pipe
              data     -> PktRecv -> hpcc_tx_pipe (ACK/NAK)      -> MAC tx
              ACK, NAK -> Notify  -> hpcc_flow_sched
              NAK      -> go-back-N -> hpcc_tx_pipe
              control  -> create/remove -> hpcc_flow_sched
  hpcc_flow_sched (6 x hpcc_flow_engine, 50 flows each)
              ACK      -> hpcc_cc
              PktSend  -> hpcc_tx_pipe (data)                    -> MAC tx
  hpcc_cc     Update (W, R) -> hpcc_flow_sched

hpcc_switch_egress
  in -> FIFO -> link model -> hpcc_int_stamp -> out
```

`hpcc_top` places `hpcc_nic` and one `hpcc_switch_egress` side by side with
their own ports; links and other switches are left to the testbench.
`hpcc_pkg` holds the shared types and constants. `hpcc_recip_div` is the
divider used inside `hpcc_cc`. All modules run on one clock `clk` with a
synchronous active-low reset `rst_n`. Most events between modules are
valid/ready pairs carrying structs from `hpcc_pkg`. The Update event and the
monitor outputs are single-clock pulses.

Packets are passed as **descriptors** (`pkt_t`): header fields such as kind,
RDMA operation, addresses, ports, queue pairs, PSN, length and the INT header.
They are not byte streams. The host side (PCIe, DMA of payload) and the
Ethernet MAC are vendor blocks and are not part of this RTL; the MAC streams
are ports of `hpcc_nic`.

## The INT record

The INT header sits between the UDP header and the InfiniBand transport header
of a RoCEv2 packet (`int_hdr_t`):

| field | bits | meaning |
|---|---|---|
| nHop | 4 | hops recorded so far; the sender sets 0, every switch adds 1 |
| pathID | 12 | XOR of the switch IDs along the path; it changes when the route changes |
| per hop: B | 4 | speed code of the egress port |
| per hop: TS | 24 | time the packet left the port, ns |
| per hop: txBytes | 20 | bytes the port has sent so far, in units of 128 B (wraps) |
| per hop: qLen | 16 | bytes queued at the port, in units of 80 B |

That is 8 bytes per hop. Up to five hops are kept (`MAX_HOPS`), so the header
is at most 42 bytes; a sixth switch leaves it alone. The speed codes are
0=10G, 1=25G, 2=40G, 3=50G, 4=100G, 5=200G and 6=400G; this numbering is a
choice of this design.

`hpcc_int_stamp` is the combinational append. `hpcc_switch_egress` calls it
when a data packet leaves the queue: TS is the emission time, txBytes
includes the departing packet, and qLen is what stays behind it. The link is
modelled as a byte budget per clock at the port speed. ACKs, NAKs and control
packets pass without a record.

## The CC engine (`hpcc_cc`)

This is the heart of the design and the part with the most arithmetic.

### What it computes

For each ACK of flow *f*, with stored link records L from the previous
ACK and the new records from this one:

1. **Per-link utilisation.** For each hop *i*:

   ```
   txRate_i = (txBytes_i - L.txBytes_i) / (ts_i - L.ts_i)
   u'_i     = min(qLen_i, L.qLen_i) / (B_i * T) + txRate_i / B_i
   ```

   The first term is the queue, in units of one bandwidth-delay product. The
   second is the fraction of the link in use. Their sum is the link's
   in-flight bytes over its capacity. The smaller of the old and new queue
   length filters short spikes.
2. **Bottleneck and filter.** u is the largest u'_i, and τ is the time gap of
   that hop, capped at T. The running estimate is then
   `U = (1 - τ/T)·U + (τ/T)·u`. Feedback that covers a longer stretch of time
   counts for more.
3. **Window.** With target η = 0.95:
   * If U ≥ η, or the additive stage counter has reached maxStage = 5:
     `W = Wc / (U/η) + W_AI` (multiplicative step).
   * Otherwise: `W = Wc + W_AI` with W_AI = 80 bytes (additive step).
4. **Once per round trip.** Wc is the reference window. It changes only when
   the ACK acknowledges data beyond `lastUpdateSeq`, which means the feedback
   describes packets sent after the last change. Then `Wc := W`, the stage
   counter resets (multiplicative step) or increments (additive step), and
   `lastUpdateSeq := snd_nxt`. Other ACKs still produce a new W, but from the
   same Wc, so several ACKs about the same queue cannot compound into an
   over-reaction. This rule is what allows HPCC to react on every ACK
   without over-reacting.
5. **Pacing rate.** `R = W / T`. The pair (W, R) goes to the flow scheduler
   as an Update event, and the ACK's records replace L.

A flow starts at `W = Wc = B_NIC·T`, which is line rate (28125 bytes at
25 Gbit/s and 9 µs). W is never allowed above that value. The first ACK of a
flow only stores records, because a rate needs two samples. The same holds
for an ACK whose pathID or hop count differs from the stored records (the
route changed). A hop whose timestamp has not moved is skipped.

### Number formats

| quantity | format |
|---|---|
| U, u | unsigned Q14 in 22 bits, so 1.0 = 16384 and the maximum is about 256 |
| W, Wc | bytes, 24 bits |
| R | bytes per clock, Q16 in 24 bits; 25 Gbit/s at 5 ns is 15.625 B/clock |
| time | ns, taken straight from TS; field differences are modulo 2^24, txBytes modulo 2^20 |

### How the divisions are done

Four divisions appear per ACK:

* **By B·T and by B.** There are seven possible speeds, so the factors are
  small elaboration-time tables indexed by the speed code:
  * `K1 = 80·2^32 / (B·T)` turns qLen units into Q14 utilisation.
  * `K2 = 1024·2^14 / Gbps` turns 128-byte units per ns into Q14.
* **By the time gap Δts and by U/η.** These are true run-time divisions.
  They go through `hpcc_recip_div`, which multiplies by a stored reciprocal.
* **By T** (the EWMA weight τ/T and R = W/T) is a multiplication by a
  reciprocal fixed at elaboration.

`hpcc_recip_div` gives x/n for n up to 2^22. Storing 1/n for every such n
is far too large. Instead the reciprocals are kept only at a relative spacing
ε. Reciprocals spaced by a fixed relative step repeat the same pattern for
every power of two, so one table of 256 mantissa reciprocals is enough:
`R[k] = round(2^24 / (256 + k))`, which gives ε = 2^-8. The unit finds the
leading one of n at position e and uses the next 8 bits of n as k. It returns
`q = (x · R[k]) >> (16 + e)`, which saturates when n = 0 or on overflow. The
quotient is high by at most about 0.4 %, since the mantissa bits below the
index are dropped. The table is filled by a loop at elaboration and takes
256 × 17 bits.

In `W = Wc/(U/η)` the numerator is `Wc·η` (η in Q14) and the denominator is
U itself.

### Timing

A small state machine handles one ACK at a time:

| state | clocks | work |
|---|---|---|
| check | 1 | read the flow's state, decide path reset or window computation |
| hop | 1 per hop | per-hop u', running maximum and τ |
| EWMA | 1 | update U |
| window | 1 | W, R, Wc and stage counter; write the state back; Update out |

Counting from the clock that accepts the ACK, the Update pulse follows
nHop + 3 clocks later, and `ack_ready` is high only while idle. With five
hops the engine handles an ACK in under 50 ns. A 25 Gbit/s port with 1000-byte packets delivers one ACK
per 320 ns at most. Flow creation (`init_valid`) resets a flow's state. It is
accepted only while the engine is idle and takes precedence over ACKs.

The per-flow state (five link records, U, Wc, stage and lastUpdateSeq) lives
in one array of `NUM_FLOWS` words of about 410 bits. Each ACK reads it once
and writes it once.

## Flow scheduler (`hpcc_flow_sched`, `hpcc_flow_engine`)

Pacing is credit based. An engine owns a fixed array of 50 flow slots and
visits one slot per clock in round robin. At each visit an active slot gains
`rate × 50` bytes of credit, which is its rate times the time since its last
visit. Credit is capped at two packets so that an idle flow cannot save up a
burst. A slot sends when all three conditions hold:

* its credit covers one packet;
* its in-flight bytes `(snd_nxt - snd_una) × packet size` are below W;
* its message has unsent packets.

Sending raises a PktSend event and advances snd_nxt.

One engine visits a slot every 250 ns and sends at most one packet per
visit, so a single flow can reach 1000 B per 250 ns, or 32 Gbit/s. That is
enough for a 25 Gbit/s port (one packet every 320 ns). A faster port needs
fewer slots per engine: at 100 Gbit/s a packet leaves every 80 ns, so FPE
must be at most 16.

To carry more flows, six independent engines run in parallel: flow f lives
in engine f / 50, slot f mod 50, which gives 300 flows. When several engines want to
send in the same clock, a round-robin arbiter picks one. Engines that lost
earlier are served first, so none can be starved by a lock-step pattern.

The scheduler also receives the receive pipe's notices:

* **ACK:** sets `snd_una := max(snd_una, psn + 1)` and forwards the ACK with
  the flow's current snd_nxt to the CC engine.
* **NAK:** rewinds snd_una and snd_nxt to the PSN the receiver expects
  (go-back-N). A NAK older than snd_una is ignored.
* **Update from the CC engine:** writes W and R into the slot.
* **Control (create/remove):** marks the slot active or inactive and starts
  the flow at line rate.

## Transmit and receive pipes

`hpcc_rx_pipe` sorts incoming packets:

| packet | action |
|---|---|
| in-sequence data | PktRecv to the TX pipe, which answers with an ACK |
| data ahead of the expected PSN | one NAK carrying the expected PSN per gap; later packets of the gap are dropped silently |
| duplicate data | acknowledged again |
| ACK or NAK | notice to the flow scheduler; a NAK also tells the TX pipe to rewind |
| control packet | create or remove a flow (the operation is WRITE, READ or REMOVE) and reset the receive PSN of that queue pair |

Receive state is one expected PSN and one NAK-sent flag per queue pair.

`hpcc_tx_pipe` keeps the context of each flow: addresses, UDP ports, peer
queue pair, operation and PSN. It builds a data packet for each PktSend and
an ACK or NAK for each PktRecv. The reply swaps the addresses and copies the
whole INT header of the data packet, so the sender sees every hop's record.
Replies take priority over data. One output register feeds the MAC. An
accepted event appears at the MAC one clock later.

## Departures and own choices

Taken as specified:

* the INT field widths and units;
* the sender algorithm with η = 95 %, maxStage = 5, W_AI = 80 B;
* T = 9 µs, 25 Gbit/s, a 5 ns clock, 6 engines × 50 flows, 5 hops;
* the credit-based round-robin pacer;
* reciprocal-table division with relatively spaced entries;
* the event structure between the modules (Update, Notify, PktSend, PktRecv).

This design's own choices:

* descriptors instead of serialised RoCEv2 headers, and no payload data
  path;
* all fixed-point formats, the speed-code numbering, and the 256-entry
  mantissa table (about 0.5 KB instead of a flat table of roughly 10 KB);
* the multi-cycle CC state machine;
* the window cap at B_NIC·T;
* records that are only stored on a flow's first ACK or after a path change;
* skipping hops with equal timestamps;
* the two-packet credit cap and the window test "in-flight below W";
* the engine arbiter;
* one NAK per gap, with replies ahead of data;
* a control packet that carries the message length in packets;
* a 64-packet lossless FIFO in the switch port, with stamping only of data
  packets.

Not built:

* the PCIe/DMA host interface and the MAC;
* the rest of a switch (routing, QoS, WRED, PFC);
* the responder side of RDMA READ. READ is carried only as the flow's
  operation code.

Behaviour worth knowing:

* **Shared MAC.** A NIC starts every flow at line rate. When several flows
  share one 25 Gbit/s MAC, each flow's full window does not bind, because the
  MAC already limits it. In the end-to-end test, a sudden 85 Gbit/s burst of
  cross traffic therefore builds a queue of a few tens of kilobytes at the
  100 Gbit/s port before the windows have shrunk enough to bind. The queue
  then drains within about 15 µs and stays near empty.
* **Standing queue.** A queue that stays put (as in the NIC test, where the
  reported queue never drains) keeps U above 1. The window then keeps
  shrinking, round trip after round trip. Recovery from a window near 1.5 KB
  takes five additive round trips, then multiplicative ones: about 50 µs.

## Simulating

Every module has a self-checking testbench in `tb/`, and two more run
incast workloads. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_hpcc_top rtl/hpcc_pkg.sv tb/tb_hpcc_top.sv
./obj_dir/Vtb_hpcc_top
```

Replace `tb_hpcc_top` with any other testbench name. The main tests:

* **`tb_hpcc_cc`** compares every window and rate with a floating-point model
  of the algorithm, to 1.5 %. It covers:
  * the multiplicative and additive steps, and the stage counter;
  * Wc changing once per round trip;
  * path changes and multi-hop maxima;
  * the nHop + 3 clock latency.
* **`tb_hpcc_recip_div`** checks random and corner-case operands over the
  full 22-bit range of n against exact division, within the table's error
  bound.
* **`tb_hpcc_nic`** loops one NIC to itself through a modelled hop whose
  reported queue is switched on and off. It checks:
  * line-rate spacing (64 clocks per packet);
  * a cut of the rate by more than half under a 32 KB queue;
  * recovery afterwards;
  * headers, INT echo and complete delivery.
* **`tb_hpcc_incast`** is the classic incast: seven senders join a long
  flow on one 25 Gbit/s switch port. It uses nine NICs (one engine each), a
  512-packet port queue and a base RTT of 5.4 µs. Measured behaviour:
  * the eight line-rate starts pile up about 213 KB of queue, which is the
    sum of the initial windows;
  * the senders cut their windows after one round trip, and the queue is
    gone 120 µs after the incast starts (sending 213 KB at 25 Gbit/s alone
    takes 68 µs);
  * the port stays 87 % busy while the eight flows share it;
  * the incast flows get similar shares, within a factor of two;
  * once they finish, the long flow is back at line rate within 55 µs: five
    additive rounds, then one multiplicative step.
* **`tb_hpcc_incast16`** reproduces a 16-to-1 incast at 100 Gbit/s. Every
  link has a 1 µs delay, T = 13 µs, and each NIC has one 16-slot engine.
  Measured behaviour:
  * the simultaneous line-rate start queues 1.87 MB, and it is gone after
    185 µs;
  * from then on the queue's 95th percentile is 4 KB (four packets);
  * the port runs at 95.4 %, which is the η target;
  * the slowest flow gets 72 % of the fastest flow's bytes.
* **`tb_hpcc_top`** runs the full default configuration end to end, in a few
  seconds. It uses four flows spread over different engines, an 85 Gbit/s
  cross-traffic burst through the 100 Gbit/s port, and one dropped packet.
  It counts each mechanism and fails if any never happened:
  * multiplicative and additive steps, Wc synchronisation and record reset;
  * window block, pacing wait and engine conflict;
  * out-of-sequence detection and go-back-N;
  * queueing, and flow create/remove.

The parameters of `hpcc_nic` change the configuration. For a 100 Gbit/s NIC
with T = 13 µs, set `NIC_GBPS=100` and `T_NS=13000`, and set `FPE=16` with
`NUM_ENGINES=19` to keep about 300 flows. The window and rate fields are
wide enough for this configuration. `tb_hpcc_incast16` runs it with one
16-slot engine per NIC.
