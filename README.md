# Packet-blocking Trojan and Traffic Snoop Manager for a 2D-mesh NoC

A Network-on-Chip router decides in switch arbitration which head flit may
cross the crossbar next. A hardware Trojan placed right after that decision
can hold back winning flits for a few cycles at a time. No packet is lost and
nothing is misrouted. The packets that cross the infected router just get
slower, which is hard to see in the average latency of the network. This RTL
contains both sides:

* **the attack**: a Trojan payload on the switch-arbitration grants of one
  router, armed by a kill-switch signal;
* **the defence**: a *Traffic Snoop Manager* (TSM) in every router. Each head
  flit carries the time it spent buffered in the router it just left. A router
  that sees abnormal delays coming from one neighbour routes around that
  neighbour.

Everything sits in an 8×8 mesh of five-port virtual-channel wormhole routers:
5 VCs per port, 128-bit flits, XY routing, credit flow control. Each tile has
a network interface (NI) that turns packets into flits and back.

## Files

| file | content |
|---|---|
| `rtl/noc_pkg.sv` | flit, head-flit, credit and route types; port numbering |
| `rtl/noc_mesh_top.sv` | the mesh: routers, NIs, links, one Trojan router |
| `rtl/router.sv` | one router; instantiates everything below |
| `rtl/input_port.sv`, `rtl/vc_buffer.sv` | VC buffers and per-VC state machine |
| `rtl/route_compute.sv` | XY routing toward the intermediate or final destination |
| `rtl/vc_allocator.sv`, `rtl/switch_allocator.sv`, `rtl/rr_arbiter.sv` | allocation |
| `rtl/crossbar.sv`, `rtl/output_port.sv` | switch, credit counters, link register |
| `rtl/ht_payload.sv` | the packet-blocking Trojan |
| `rtl/tsm.sv`, `rtl/tsm_detector.sv`, `rtl/tsm_redirect.sv` | Traffic Snoop Manager |
| `rtl/network_interface.sv` | packetisation, injection, reassembly, latency |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_noc_mesh_full.sv` | the end-to-end test on the mesh at its default 8×8 size |

## The mesh

Node `id = y*COLS + x`. North is towards larger `y` (`id + COLS`) and East
towards larger `x`. Ports are numbered Local 0, North 1, East 2, South 3,
West 4. Input port *p* of a router is fed by the facing output port of its
neighbour in direction *p*. Credits run the other way. Ports at the mesh edge
are tied off, and XY routing and the redirection rules never use them. A 16-bit
free-running cycle counter (`now`) is shared by all routers and NIs.

Top-level parameters (defaults in brackets): `COLS` [8], `ROWS` [8],
`NUM_VCS` [5], `BUF_DEPTH` [4 flits per VC], `HT_NODE` [27, i.e. x=3, y=3,
a centre router], `HT_P_ACT_Q8` [154 = 0.6 × 256], `TSM_HOLD` [512 cycles].

Top-level ports. There is one array entry per node for the per-node signals.

| port | dir | meaning |
|---|---|---|
| `ht_kill_switch` | in | arms the Trojan; the trigger behind it is not modelled |
| `tsm_enable` | in | turns detection on in every router (clearing it drops all flags) |
| `inj_valid/ready, inj_dst, inj_len, inj_payload` | in/out | one packet per handshake: destination, 1..15 flits, 64-bit payload word |
| `rx_valid, rx_src, rx_len, rx_latency, rx_rerouted, rx_error, rx_payload` | out | one pulse per delivered packet, the cycle after its tail arrives |
| `suspect[n]`, `anomaly[n]` | out | per router, per direction: neighbour suspected / anomaly pulse |
| `ht_active`, `ht_block_event` | out | Trojan episode in progress / a new port blocked this cycle |

The same netlist runs three ways:

* the clean baseline, with `ht_kill_switch = 0`;
* the infected network, with `ht_kill_switch = 1` and `tsm_enable = 0`;
* the infected network with mitigation, with both inputs at 1.

## Flits and the head-flit header

A flit is `{ftype[1:0], vc[2:0], data[127:0]}`. The type is head, body, tail
or head-tail. Head-flit `data` (`head_t`, LSB first):

| bits | field | use |
|---|---|---|
| 7:0 | `dst` | final destination |
| 15:8 | `src` | source node |
| 23:16 | `inter_dst` | intermediate destination set by a redirection |
| 24 | `inter_valid` | packet is heading for `inter_dst` first |
| 25 | `rerouted` | some TSM redirected this packet |
| 33:26 | `hop_delay` | buffering time in the previous router (see below) |
| 49:34 | `inj_time` | cycle the head left the source NI |
| 53:50 | `len` | packet length in flits |
| 63:54 | reserved | |
| 127:64 | `payload` | IP payload word |

Body and tail flits carry `{payload, 40'b0, index, src, dst}`. With these, the
receiving NI checks that the flits arrived in order and belong together.

## Router pipeline and timing

Each VC of an input port is in one of three states:

1. **IDLE → RC.** A head flit sits at the front. One VC per port and per cycle
   (the lowest index first) gets route computation. XY routing is applied
   toward `inter_dst` while `inter_valid` is set, and toward `dst` otherwise.
   When a router is itself the intermediate destination, the field is cleared.
   The TSM redirection unit may then replace the result (see below).
2. **VA.** The VC requests an output VC of its output port. A separable
   allocator gives it the lowest free VC, using one round-robin arbiter per
   output port over all 25 input VCs.
3. **ACTIVE.** The VC requests the switch whenever it holds a flit and its
   output VC has a credit. Switch allocation is input-first: round robin over
   the VCs of a port, then round robin over the ports at each output. The
   grant reads the flit. The flit then crosses the crossbar and is registered
   onto the output link, and a credit goes back upstream. The tail flit frees
   the output VC and returns the input VC to IDLE.

A head flit that meets no contention is written at cycle *t*, routed at *t+1*,
allocated at *t+2*, and crosses at *t+3*. The next router sees it at *t+4*.
The router's own delay is therefore 3 cycles, and a packet's minimum latency
from NI to NI is `4·(hops+1) + len − 1` cycles. The testbenches check this
exact minimum.

**Measuring the hop delay.** When a head flit is written into a buffer, its
`hop_delay` field is first read by the TSM. The field is then overwritten with
the low 8 bits of `now` (the entry time). When the flit leaves, the field
becomes `now − entry`. The next router therefore receives the true buffering
time of the previous router, modulo 256.

## The packet-blocking Trojan (`ht_payload`)

The Trojan sits between the switch allocator's grants and the buffer reads:
`gnt_out = gnt_in & ~blocked`. The arbiter believes it has granted. Its
round-robin priority moves on, but a blocked flit stays in its buffer, and the
cycle on that output is lost.

* While the kill switch is high and the Trojan is dormant, it draws a random
  number every `ACT_PERIOD` (64) cycles. With probability `P_ACT_Q8/256` it
  starts an episode lasting a random 1..`MAX_BLOCK` (32) cycles.
* During an episode, every cycle it picks one input port at random among those
  whose **head** flit has just won arbitration, and adds that port to a block
  mask. A blocked port loses all its grants until the episode ends, so blocking
  accumulates over the episode in different directions.
* When the episode ends the mask is cleared.

Randomness comes from a 16-bit Galois LFSR seeded from the node id. In the
mesh, only router `HT_NODE` instantiates the payload (`router.HT_EN`).

## The Traffic Snoop Manager (`tsm`)

**Detection (`tsm_detector`, one per neighbour direction).** Each arriving
head flit reports its delay `d_i` in the neighbour it came from. The detector
keeps the last `W = 5` delays and computes

    M_i = Σ_{j=1..k} w_j · d_{i−j+1} / Σ_{j=1..k} w_j ,   w_j = W − j + 1 ,   k = min(i, W)

so the newest delay weighs 5 and the oldest weighs 1, and the first four
samples use a shorter window. A sample is an **anomaly** when all of these
hold:

* `d_i > THR_NUM · M_{i−1}` (2 by default), computed exactly by
  cross-multiplication;
* `d_i ≥ MIN_ANOMALY` (8 cycles);
* at least one sample came before it.

`avg` outputs `M_i` (integer quotient).

An anomaly marks that direction **suspect** for `SUSPECT_HOLD` cycles after
the most recent anomaly. The Local port is not monitored.

**Redirection (`tsm_redirect`, one per input port).** This unit sits after
XY route computation. It acts only when all of these hold:

* the expected output port points at a suspect neighbour;
* the packet is not already heading for an intermediate destination;
* the packet's destination is not that neighbour itself.

It then changes the route as follows:

| expected port | new port | intermediate destination |
|---|---|---|
| East | North if `dst_y > cur_y`, else South | `id ± COLS` (that neighbour) |
| West | North if `dst_y < cur_y`, else South | `id ± COLS` |
| North | East (West in the last column) | `id + 2·COLS ± 1` |
| South | East (West in the last column) | `id − 2·COLS ± 1` |

At the top or bottom row, the East/West rule takes the row that exists. The
North/South target row is clamped into the mesh. The packet then travels by XY
to the intermediate destination, drops it there, and continues by XY to its
final destination. For the North/South case, the source rule names the output
port "Local". Here that is read as "recompute the port locally toward the
intermediate destination", which always gives East or West, one column aside
of the suspect router.

The West rule is kept as published, though it is not the mirror image of the
East rule. In one case it sends a packet one row away from its destination.
That packet is still delivered, but it can pass back through the suspect router
when the destination lies directly beyond it in the same column.

## Network interface

Packets are sent one at a time, and successive packets use VCs 0,1,2,… in
turn. The NI keeps its own credit count for each VC of the router's Local
input port. It always accepts ejected flits and returns their credits at once.
Latency runs from the cycle the head flit leaves the source NI to the cycle the
tail flit reaches the destination NI. `rx_error` flags a wrong destination, a
leftover intermediate destination, or a body flit whose payload or index does
not match.

## Design choices not fixed by the published description

* The buffer depth of 4, credit flow control, the allocator structure and the
  three-state VC machine. The 3-cycle router delay matches the "about three
  cycles" the design assumes for an unloaded router.
* The head-flit layout and the NI packet format, including the 64-bit payload
  word per packet.
* The Trojan's draw period, episode length, victim selection and LFSR. The
  activation probability 0.6 is the value the evaluation uses.
* The anomaly rule (2× the average and at least 8 cycles) and the suspect hold
  time. The window of 5 with linear weights is the published one.
* The edge handling in redirection, and the single-redirection rule.
* The Trojan router is placed at node 27.

## Limitations

* Redirected packets share VCs with XY traffic. Routing in two XY phases
  through an intermediate node is not proven deadlock-free on shared VCs. No
  deadlock occurred in the tests (light and moderate load), but a production
  version would put the second phase on its own VC class.
* `hop_delay` wraps at 256 cycles, and `rx_latency` wraps at 65 536 cycles.
* The kill-switch trigger and the IP blocks are outside this RTL.
* The evaluation varies the VC count of the infected router only. Here
  `NUM_VCS` applies to the whole mesh.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog. Each block's testbench was also run against a deliberately broken
copy of the block and failed.

* `tb_vc_buffer`: random push/pop against a queue model, including full.
* `tb_route_compute`: every destination from four positions, with and without
  an intermediate destination.
* `tb_tsm_redirect`: 20 000 random cases over centre, edge and corner routers
  against a model of the redirection table.
* `tb_tsm_detector`: moving average after every sample, and the anomaly pulse.
* `tb_tsm`: flag raise, hold and clear; redirection of East and North traffic;
  the enable input.
* `tb_ht_payload`: only grants are removed; one new victim per cycle, and only
  head flits; a blocked port stays blocked for the whole episode; episode
  length; measured activation probability (≈0.58 for 0.6).
* `tb_switch_allocator`, `tb_vc_allocator`: legality, round-robin bounds, and
  the alternation of two inputs competing for one output.
* `tb_crossbar`, `tb_output_port`, `tb_input_port`, `tb_network_interface`:
  data path, credits, header patching and the 3-cycle hop delay, packet
  reassembly and latency.
* `tb_router`: one router with all five neighbours modelled; ~10 000 packets
  through three phases (plain, TSM redirection, Trojan armed with probability
  1). It checks output ports, flit order, no loss, exact hop delays (3 when
  unhindered, up to ~140 under attack), and the redirected ports and
  intermediate destinations.
* `tb_noc_mesh_top`: a 4×4 mesh with the Trojan at node 5, uniform random
  traffic at 0.03 packets/node/cycle, 1–5 flits, through three phases: clean,
  Trojan armed, Trojan armed with the TSM on. Every packet must arrive intact
  exactly once, no faster than the pipeline minimum, and many at exactly that
  minimum. Trojan blocking, slowed packets, anomalies, suspect flags and
  redirected deliveries must each happen. One run gave average latencies of
  17.2 / 17.6 / 18.5 cycles in the three phases, with 259 redirected packets.
* `tb_noc_mesh_full`: the same test on the full 8×8 mesh at its default
  parameters, 0.012 packets/node/cycle. One run delivered 9305 of 9305
  packets intact, with 80 Trojan blocks, 32 anomalies, 13 suspect flags and
  178 redirected packets. Average latencies were 27.9 / 27.6 / 28.5 cycles.
  At this light load the Trojan hardly moves the network-wide average, and
  detouring costs a few cycles. The effect shows in the packets that cross
  the infected router.

### Running a testbench with Verilator

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/noc_pkg.sv \
        tb/tb_router.sv --top-module tb_router -j 4
    ./obj_dir/Vtb_router

Use the same command with any other `tb_*` name. `-Irtl` lets Verilator find
each module in the file of the same name. `-Wno-fatal` keeps the width warnings
from the testbenches' helper functions from stopping the build. The unit tests build in
seconds. The 4×4 mesh takes about 3 minutes to compile and 1 second to run.
The 8×8 mesh is 64 fully inlined routers. Its C++ compilation takes about
17 minutes on four cores, and 12 000 cycles then simulate in about 10 seconds.
