# Disha: deadlock recovery for fully adaptive wormhole routing

Wormhole networks that route fully adaptively can deadlock: a ring of
packets, each holding the channel the next one wants. The usual cure is to
prevent deadlock by reserving virtual channels or forbidding turns. That costs
adaptivity, router speed, or both. Disha instead lets the network deadlock,
since this is rare, and recovers cheaply when it happens:

* Every router has one extra flit buffer, the **Deadlock Buffer** (DB).
  Together, the DBs of all routers form a second, separate network.
* A packet whose head flit has waited longer than a time-out **T_out** is
  assumed to be deadlocked.
* One **Token** circulates through all routers on a fixed ring. A router that
  has a deadlocked packet and receives the Token keeps the Token. It then
  sends that packet into the DB network, and the packet follows DB buffers to
  its destination. Removing it from the cycle breaks the deadlock.
* Only the Token holder may put a packet on the DB network, so the DB network
  carries one packet at a time and cannot deadlock itself.
* The DB path has no links of its own. It uses the ordinary physical channels.
  A **Status** wire tells the receiver "this flit goes into your DB". A DB
  flit takes priority over the packet currently using an output. When
  needed, the crossbar is **reconfigured**: the cut connection is saved and
  restored once the DB packet's tail has passed.

This repository holds synthesizable SystemVerilog for the router and a
parameterized 2-D torus (or mesh) built from it. The default size is the
16 × 16 torus with 32-flit messages, 2-flit input buffers and T_out = 8 that
the scheme was evaluated with.

## Structure

```
disha_network          KX x KY routers, neighbour channels, Token ring
└── disha_router       one router (per node)
    ├── channel_rx         Status steering of 4 incoming channels into IBs / the DB
    ├── flit_fifo  x6      4 input buffers (depth 2), injection buffer, DB (depth 1)
    ├── route_compute x6   address decoder per crossbar input
    ├── deadlock_detector x4  T_elapsed vs T_out, Deadlock Bit per network input
    ├── token_logic        Token latch: pass unless held
    ├── disha_control      decision and control logic
    │   └── reconfig_buffer   saved connection during a reconfiguration
    └── xbar               6 x 5 crossbar
disha_pkg                flit and channel types, port numbering
```

Crossbar inputs are numbered X+ 0, X- 1, Y+ 2, Y- 3, DB 4, Node 5. Outputs
are numbered X+ 0, X- 1, Y+ 2, Y- 3, Node 4. Input "X+" is the channel
arriving from the neighbour at x+1. Output "X+" leaves towards x+1. The
network's node (x, y) has index `y*KX + x`.

## The channel

Each direction between neighbours is one unidirectional channel:

| signal | direction | meaning |
|---|---|---|
| `req` | sender → receiver | a flit is on the channel |
| `status` | sender → receiver | the flit belongs in the receiver's Deadlock Buffer |
| `flit` | sender → receiver | `{head, tail, data[15:0]}` |
| `send` | receiver → sender | the receiver can take the flit |

A flit moves in every cycle in which `req` and `send` are both high. The
receiver derives `send` from `status` within the cycle. With `status` low it
looks at the input buffer's room, and with `status` high at the DB's room.
The sender drives `status` from a register, so no combinational loop forms
between routers. A sender may withdraw a flit that was refused. This happens
when its crossbar is reconfigured.

The head flit carries the destination: `data[3:0]` = x, `data[7:4]` = y.
The other data bits are free.

## Normal operation

Each router has one lane per physical channel, with no virtual channels and
no output buffers. When a head flit reaches the front of an input buffer, it
claims one free output on a shortest path to its destination. On a torus,
both directions of a ring count when the destination is exactly half-way
round. The output must also have room downstream. Inputs are visited in a
rotating order, and the lowest-numbered qualifying output is taken. From then
on the connection carries one flit per cycle while flits are available and
`send` is high. The tail flit releases the connection. A head takes one
cycle to connect, so a lightly loaded path costs 2 cycles per hop for the
head, and the body streams behind it at one flit per cycle.

## Detecting deadlock

For each of the four network inputs, `deadlock_detector` counts
**T_elapsed**, the consecutive cycles in which the head flit at the front of
that buffer was not sent. Any cycle without a waiting head resets the count.
When T_elapsed > T_out, the **Deadlock Bit** is set. With the head waiting
from cycle 0, the bit is high from cycle T_out + 2.

The bit stays set until one of two things happens:

* The head leaves normally. Another router broke the cycle, so the detector
  simply starts over.
* The recovered packet's tail has left this router.

Because the bit only reports a long wait, it also fires on congestion that
is not a deadlock. Such a packet then takes the DB path, which is harmless.

## The Token

`token_logic` is one flip-flop. Each cycle it computes

    token_out  = token_here AND NOT hold
    token_here <= token_in OR (token_here AND hold)

The Token therefore moves one router per clock until some router holds it.
`hold` is high from the cycle a recovery starts until the recovered packet's
tail has left.

The ring visits every router once along mesh links. It goes up column 0,
then snakes through rows 1..KY-1 of columns 1..KX-1, then returns along
row 0. This is why KX must be even. Router (0,0) owns the Token after reset.

## Recovery and crossbar reconfiguration

This is the part of the design that takes the most care. `disha_control`
evaluates four steps every cycle, in this order:

1. **Release.** A connection whose tail flit moves is freed. If that
   connection was the DB path and the reconfiguration buffer holds the
   connection it displaced, the old connection is put back. Its packet then
   continues where it stopped.
2. **DB head.** A head flit in the DB takes its dimension-order output (X
   first, then Y, then the node). The output is driven with `status` high, so
   the flit lands in the next router's DB. If a normal packet is using that
   output mid-packet, the connection is cut and saved as (input, output) in
   `reconfig_buffer`. One entry is enough, because only one DB packet passes
   at a time.
3. **Recovery start.** Three conditions must hold:
   * the Token is here;
   * no DB traffic is passing through this router;
   * some input's Deadlock Bit is set while its head is still waiting.

   The packet at the lowest-numbered such input is then switched to the DB
   path. It gives back any output it had claimed but not used. It takes its
   dimension-order output, displacing a normal connection if necessary, with
   `status` high. The Token is held until its tail has gone.
4. **Normal allocation** as described above.

A DB packet stays on the DB network until it reaches its destination. Its
body flits still arrive through normal input buffers at the router where
recovery started, and from there on they follow the head on the DB path.

At a node, flits of a DB packet can interleave with flits of a normal packet
being ejected, because the DB may displace the ejection connection too. The
ejection port flags DB flits with `ej_db`, so a receiver must reassemble the
two streams separately.

The displaced normal packet keeps its flits in order. Its flits already
downstream may move on while the rest wait here. That is safe, because its
connection is restored when the DB tail has passed.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `KX`, `KY` | 16, 16 | network, router, route_compute | network size (≤ 16; KX even) |
| `TORUS` | 1 | network, router, route_compute | wrap-around links; 0 gives a mesh |
| `BUF_DEPTH` | 2 | network, router | input and injection buffer depth (flits) |
| `DB_DEPTH` | 1 | network, router | Deadlock Buffer depth (flits) |
| `TOUT` | 8 | network | time-out T_out in cycles (routers take it on the `t_out` port) |
| `CNT_W` | 8 | network, router, deadlock_detector | width of T_elapsed / T_out |
| `EARLY_RELEASE` | 0 | network, router, disha_control | 1 passes the Token on before the recovered packet's tail has gone (see below; can stall under load) |

Data width (16 bits) and coordinate width (4 bits) are package constants in
`disha_pkg`.

## Choices this design makes

The scheme fixes the mechanisms: the DB, the Status bypass, the Token and its
logic, time-out detection, and reconfiguration with a one-entry buffer. The
following choices are this implementation's own:

* **One lane per physical channel.** The scheme was also evaluated with 2 and
  3 virtual channels per link sharing the DB. That variant is not built.
* **Routing.** Minimal fully adaptive routing for normal packets, and
  dimension-order routing on the DB path. Since no misrouting happens, no
  livelock bound is needed.
* **Token speed.** The Token runs on the router clock, one hop per cycle.
  The scheme suggests clocking it faster.
* **Token release.** By default the Token is released when the recovered
  packet's tail leaves the router that started the recovery. With
  `EARLY_RELEASE = 1`, that router counts the flits of the packet it sends.
  The DB path to the destination is `hops` routers long and holds at most
  `hops × DB_DEPTH` flits. Once one more flit than that has left, the head
  must already have been sunk at the destination, so the DB path cannot
  close a cycle. The router then clears the Deadlock Bit and passes the
  Token on while the rest of the packet keeps streaming. `route_compute`
  supplies `hops`. In both modes, the tail of one DB packet can still be
  draining further down the DB path when the next recovery starts elsewhere.

  **Caution:** the early release is verified on one router only. In an 8×8
  torus at saturation it stalled the network. After the Token leaves, the
  rest of the recovered packet A may still be upstream in the normal
  network. A second DB packet B can then cut A's connection there. Meanwhile,
  B's head waits for the output that A's DB connection holds further on, so
  A and B wait on each other. Keep `EARLY_RELEASE = 0` unless DB packets
  never cut connections that a packet still on the DB path relies on. This
  design does not provide that guarantee.
* **DB entry.** When two channels offer DB flits at once, the lowest one
  wins. The DB then stays locked to that channel until the packet's tail.
* **Recovery start** waits until the router has no DB traffic of its own
  passing through.
* **Injection buffer.** The injection port has a 2-flit buffer of its own.
* **Reset.** All resets are asynchronous, active low (`rst_n`).

## Simulating

Every file in `rtl/` and `tb/` is self-contained SystemVerilog-2017.
`disha_pkg.sv` must be read first. A testbench prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/disha_pkg.sv \
          tb/tb_disha_network.sv --top tb_disha_network -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_flit_fifo` | order and flags of 2- and 1-deep buffers against a model |
| `tb_channel_rx` | Status steering, Send, one DB packet at a time, lowest channel first |
| `tb_route_compute` | shortest-path and dimension-order outputs for a 16×16 torus and a 5×3 mesh, against hop counts, and the `hops` output |
| `tb_deadlock_detector` | Deadlock Bit at exactly T_out + 2 waiting cycles for T_out = 4, 8, 16, 64; restart; saturation |
| `tb_token_logic` | the token truth table, holding and passing |
| `tb_xbar` | random crossbar configurations |
| `tb_reconfig_buffer` | save / match / restore, including the X-→X+ and X-→Y- examples |
| `tb_disha_router` | one router: injection, ejection, a DB packet displacing and restoring a connection, and time-out → Token capture → DB send → Token release with exact detection timing. A second copy built with `EARLY_RELEASE = 1` gets the same stimulus. It must move the same flits and pass the Token on after exactly 3 DB flits (2 hops + 1) |
| `tb_disha_network` | 4×4 torus, 24 packets of 32 flits per node under saturating uniform random traffic; every packet must arrive complete and in order. It counts Deadlock Bits, recoveries, reconfigurations, restores, DB deliveries, node interleaving and Deadlock Bits cleared without the Token, and requires each of them to occur |
| `tb_disha_workloads` | the evaluated traffic patterns on four 8×8 tori at saturation: uniform traffic with T_out = 4, 16 and 64, and 5 % hot-spot traffic to 4 nodes with T_out = 8. It uses the helper `disha_traffic_run` (traffic source, sink and checker) |
| `tb_disha_network_full` | the same test at the default 16×16 size, 6 packets per node. Compiling takes about 5 minutes, and the run under a minute |

Under saturating load, the 4×4 test delivers its 384 packets in about 2000
cycles, with about 35 recoveries. The 16×16 run delivers 1536 packets with
about 850 recoveries and over 3000 crossbar reconfigurations.

In the workload test, shorter time-outs capture the Token more often, as
expected. Per 1000 delivered packets, runs gave 110 to 140 captures at
T_out = 4, 90 to 100 at 16 and 70 to 80 at 64. The exact numbers depend on
the random traffic. These figures are for saturating load,
well beyond the point where a one-lane network saturates. They are not
comparable with capture rates measured below saturation.

## Limits

* No virtual channels. A one-lane network saturates early, so this RTL
  covers the one-lane configuration only.
* One Token. Recoveries in different parts of the network happen one after
  another.
* The ejection port must be able to sink flits. The tests keep `ej_ready`
  high. A node that stalls ejection can stall a DB packet, and with it the
  recovery.
* Throughput and latency curves under load were not measured with this RTL.
