# SlideAcross: a bypassing adaptive router for the wireline layer of a wireless NoC

A hybrid wired-wireless network-on-chip (WiNoC) puts only a few expensive
wireless transceivers on the chip. Every other core reaches a transceiver,
or a remote destination, through several hops of an ordinary wired mesh. Those
wired hops, each a multi-stage router pipeline, set much of the packet latency.
SlideAcross is a router for that wired layer. It keeps a conventional
adaptive virtual-channel (VC) pipeline for loaded traffic. It adds a
*single-cycle bypass* that lets a packet slide straight through a router
along a row or a column while the network is quiet.

This repository holds synthesizable SystemVerilog for the SlideAcross router,
its network interface, and an 8 x 8 mesh of them: the 64-node wireline layer of
a surface-wave WiNoC. The surface-wave transceivers and the wireless medium
are analog parts and are not included (see *What is not here*).

## The two datapaths

Each router has five ports: Local, North, East, South and West. East is +x
and North is +y. Every input port holds three flit buffers:

* **VC0** and **VC1**, the ordinary virtual channels;
* the **SVC** (slide virtual channel), a VC reserved for bypassing.

A flit is 128 data bits plus a sideband header. The header has head/tail
marks, the SVC tag bit, the packet's VC (0 or 1) and the destination x/y.

**Adaptive (buffered) datapath, 3 cycles per router.**

| cycle | stage | what happens |
|---|---|---|
| t   | BC + BW | bypass control rejects the flit, so it is written into the buffer chosen by its SVC tag and VC |
| t+1 | RC, SA-I, SA-II, VA | route computation and selection; the (V+1):1 arbiter picks one buffer per input (through Mux1); the 5:1 arbiter picks one input per output; the winner is given its downstream VC, or the SVC |
| t+2 | ST | the flit sits in the output's switch-traversal register and is loaded into the output link register |

The flit is on the link to the next router from cycle t+3.

**Bypass datapath, 1 cycle per router.** Each directional input is wired
straight to the output multiplexer (Mux2) of the opposite output: West to East,
North to South, and so on. Such a path is usable in a cycle when the crossbar
is not driving that output, which means the output got no switch-allocation
grant in the cycle before. A flit arriving in cycle t then leaves through Mux2
into the output link register at the end of cycle t. It skips buffering and
both allocation steps.

### Who may bypass

Only flits carrying the SVC tag may bypass. The decision then needs no VC
decoding: it looks at a single "downstream SVC idle" bit per output, so its
delay does not grow with the number of VCs. For a head flit arriving on input
*i*, with *o* the opposite output:

```
bypass = svc
       & (dst != current in the dimension of travel)   // no overshoot, routing stays minimal
       & svc_idle[o]                                    // downstream SVC unowned and empty
       & !st_busy[o]                                    // crossbar not using o this cycle
       & svc_buffer_empty[i]                            // keep flit order
```

Body and tail flits follow their head. A small state machine in
`bypass_ctrl` remembers that the current SVC packet's head bypassed. Each
later flit of that packet bypasses when the output is free and an SVC credit
is available. Otherwise it is written to the SVC buffer and follows through
the crossbar, still on the downstream SVC. Once one flit is buffered, no
later flit bypasses until the buffer drains, so flits never overtake.

### How a packet gets the SVC tag

A packet never enters the SVC at injection. When a head flit wins switch
allocation at some output, it is given the downstream SVC instead of its own
VC if that SVC is idle: unowned, with all its credits back, so the buffer is
empty. From then on the packet rides the SVC, and each following router on the
same row or column can bypass it in one cycle. This holds as long as the next
SVC is idle and the output is free. At a turn, or at the destination, the
packet is buffered in that router's SVC buffer and competes for the crossbar
like any other packet.

A zero-load packet that crosses a row of K routers therefore spends:

1. 1 cycle in the interface;
2. 3 cycles in the first router, where it is tagged;
3. 1 cycle in each of the K-2 routers in between;
4. 3 cycles in the last router.

For K = 8 that is 13 cycles. The same trip on the buffered path alone takes
1 + 3K = 25 cycles.

### Credits

All links use credit-based flow control per buffer (VC0, VC1, SVC). Wormhole
flow control holds throughout. A bypassed flit never occupies the bypassing
router's buffer, so that router returns the upstream SVC credit in the same
cycle. The router also spends one of its own SVC credits for the next router.
The Local output (ejection) never back-pressures.

## VC allocation and deadlock freedom

VC allocation is deliberately trivial, so it fits in the same cycle after
switch allocation:

* **A packet keeps its VC for life.** The interface chooses it at injection.
  VC0 is for destinations west of the source (smaller x) and VC1 for
  destinations east. A destination in the same column takes the VC with more
  free space at the local router; a tie alternates.
* A head flit requests an output only when its own VC there is idle
  (unowned, with a credit). Winning switch allocation therefore always
  succeeds in VC allocation.
* Routing is minimal and fully adaptive. Of the two productive ports, the
  selection unit masks one whose VC is busy. If both or neither are busy,
  it takes the port with more free credits, X on a tie.

VC0 packets never move east and VC1 packets never move west. Routing is
minimal, so neither VC can close a cycle of turns. The SVC is shared by both
VCs and could chain them together. It is granted only when the downstream SVC
buffer is empty, so each SVC holds at most one packet and cannot form such a
chain.

## Modules

| file | role |
|---|---|
| `rtl/slide_pkg.sv` | sizes, `flit_t`, `link_t`, `port_e`, event struct, `opposite()` |
| `rtl/winoc_mesh.sv` | **top**: KX x KY mesh (8 x 8 default) of routers and interfaces |
| `rtl/slide_router.sv` | one SlideAcross router: 5 input units, 5 output units |
| `rtl/input_unit.sv` | BC, 3 flit buffers, RC + selection per buffer, SA-I (Mux1), credit return |
| `rtl/output_unit.sv` | SA-II, VC & SVC allocator, credit counters, ST register, Mux2 |
| `rtl/bypass_ctrl.sv` | bypass decision and the per-packet bypass state machine |
| `rtl/route_select.sv` | minimal adaptive route computation with congestion masking |
| `rtl/flit_fifo.sv` | one VC buffer (4 flits) |
| `rtl/rr_arbiter.sv` | round-robin arbiter, used as the (V+1):1 and the 5:1 arbiter |
| `rtl/net_iface.sv` | network interface: packetising, VC choice at injection, ejection |

The top's ports are one entry per node:

* a packet-injection handshake (`inj_valid`/`inj_ready`, destination,
  length in flits, 128-bit payload);
* the ejected flits (`ej_valid`, `ej_flit`, `ej_pkt_done`);
* an event struct per router (`ev`: bypass, SVC tag, buffered traversal,
  adaptive detour, switch-allocation stall), for statistics.

Node n sits at x = n % 8, y = n / 8.

## Parameters and choices of this implementation

The original design fixes the following:

* the 128-bit datapath;
* two VCs plus one SVC per input;
* 5-port routers;
* a 3-stage buffered pipeline;
* a single-cycle bypass;
* the bypass and VC rules above;
* 64 nodes.

This implementation chose the following where the original is silent:

* 4 flits per VC buffer (`BUF_DEPTH`);
* the sideband flit header, with the destination carried on every flit;
* credit-based flow control;
* round-robin arbiters;
* the tie-break in the selection unit;
* bypass in both dimensions (the original details the X dimension);
* the body-flit handling of a bypassed packet;
* the rule that a crossbar winner does not take an SVC that a bypassing head
  claims in the same cycle;
* the Local port having no SVC and unlimited credits;
* an interface that sends one packet at a time, with the flit index in the
  low 8 data bits.

Sizes live in `slide_pkg` (`MESH_X`, `MESH_Y`, `DATA_W`, `BUF_DEPTH`, `NUM_VC`).
The mesh size can also be set per instance with `winoc_mesh #(.KX(), .KY())`.
The coordinate fields are 3 bits wide, so meshes up to 8 x 8 fit.

## What is not here

* **Surface-wave transceivers and waveguide.** These are analog RF parts:
  FDMA over 128 carriers at 256 Gbps, on a dielectric-coated metal sheet
  with a measured 3 dB bandwidth of 37.5 to 80 GHz. No circuit or digital
  interface is defined for them.
* **Routers at the 5 wireless nodes.** Neither their inter-layer routing nor
  their placement is specified. Here every node has a SlideAcross router; the
  injection and ejection ports are where a wireless interface would attach.
* **Link-level retransmission.** The evaluation models an alternating-bit
  protocol with ACK/NACK driven by a bit-error rate, but gives no frame format.
* **Cores, caches and memory controllers**, which only generate the traffic.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_rr_arbiter`, `tb_flit_fifo`, `tb_route_select`, `tb_bypass_ctrl`:
  random stimulus against independent reference models.
* `tb_output_unit`, `tb_input_unit`: directed sequences covering:
  * SVC allocation and the bypass/crossbar conflict;
  * credit counting;
  * the 2-cycle grant-to-link delay;
  * bypass in the arrival cycle;
  * the fallback to the SVC buffer;
  * the overshoot rule.
* `tb_slide_router`: one router with random traffic on all five inputs. It
  checks for every flit:
  * a productive output port;
  * in-order, unbroken packets per VC;
  * an unchanged VC id;
  * no lost packets.

  It also checks a 1-cycle bypass and a 3-cycle buffered hop.
* `tb_net_iface`: the VC rule, flit format, credit stall and ejection.
* `tb_winoc_mesh` (4 x 4) and `tb_winoc_mesh_full` (default 8 x 8) run the
  same end-to-end test:
  1. zero-load trips along a row and a column, whose head latency must be
     exactly 1 + 3 + (K-2) + 3 cycles with 4(K-2) bypass hops;
  2. uniform random traffic;
  3. a hotspot burst.

  A scoreboard checks delivery, order and the VC rule. The test fails if
  bypass, SVC tagging, buffered traversal, adaptive detour,
  switch-allocation stall or same-column use of both VCs never happens.

With plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_slide_router \
    rtl/slide_pkg.sv $(ls rtl/*.sv | grep -v slide_pkg) tb/tb_slide_router.sv
./obj_dir/Vtb_slide_router
```

The 8 x 8 mesh builds into a large C++ model: expect a build of several
minutes (about 8 with four compile jobs), then about a second of simulation. The 4 x 4 test builds much
faster.

Timing claims from the original design, such as the 0.05 ns bypass decision
and the 0.2 ns bypass wire at 45 nm, are properties of a physical
implementation. This RTL does not check them.
