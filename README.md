# Source-routed asynchronous NoC routers: 8x8 mesh and deadlock-free 8x8 torus

Two 64-node networks-on-chip, each built from five-port routers that have no
routing logic and no crossbar:

* **Mesh.** An 8x8 mesh of plain routers with 72-bit flits.
* **Torus.** An 8x8 torus of routers with two virtual channels and 59-bit flits.
  A *refusal* signal (negative acknowledgement, "nack") on every network link
  keeps the torus rings free of deadlock.

Every flit carries its complete route. The route is a list of two-bit
directions, one for each router on the way. A router reads the top pair, sends
the flit that way, and rotates the address by two bits. When the flit reaches
its destination, its address field has been rotated into a record of the path
it took. The receiver gets the route back to the sender from that record by
reversing and inverting the pairs. No table or extra header field is needed.

The routers come from a relative-timed *asynchronous* design. The links use
bundled data with 2-phase (transition) signalling. Inside a router, 4-phase
(return-to-zero) handshakes run between latch controllers, mutexes and phase
converters. This RTL is a **clocked model** of those circuits. Each controller
is a synchronous state machine with the same handshake wires and the same event
order, so the RTL can be synthesized and simulated with ordinary tools. The
model keeps the protocols, the flow control and the arbitration. It does not
model asynchronous timing (gate delays, relative-timing constraints, wire
delay). Read cycle counts as step counts, not picoseconds.

## Flit formats and source routes

```
mesh flit  (72): [71:42] address, 15 pairs   [41:0] payload (32 data + 10 spare)
torus flit (59): [58] channel  [57:40] address, 9 pairs   [39:0] payload (32 data + 8 spare)
```

Direction codes (`noc_pkg::dir_e`):

| code | direction |
|------|-----------|
| `00` | N         |
| `01` | E         |
| `10` | W         |
| `11` | S         |

These codes are this design's choice. They make the opposite direction the
bitwise inverse of a code. Ports 0..3 of a router are the four directions, and
port 4 is the local core.

A route is the XY path (X first), one pair per router that forwards the flit.
After the last hop comes one extra **exit pair**, equal to the inverse of the
last hop. The destination router reads the exit pair on the input port the
flit arrived on. That pair is the code of this port's own direction, which no
network switch ever needs for forwarding (no U-turns). A network switch
therefore reads its own code as "deliver to the core". The core port's switch
has no such rule and reads all four codes as directions.

The widths fit the worst case exactly:

* **Mesh:** 2(8-1) = 14 hops, plus the exit pair, is 15 pairs = 30 bits.
* **Torus:** 8 hops when going the short way round each ring, plus the exit
  pair, is 9 pairs = 18 bits.

Unused pairs below the exit pair are zero. `noc_pkg::source_route` computes a
route. `route_encoder` wraps that function for a sending node in place of a
precomputed route table. In the torus, a tie at distance N/2 goes East or
South.

**Return route.** Each switch rotates the address left by two bits. After h
hops and the exit, the pairs used sit in the lowest 2(h+1) bits, in order: the
first hop is highest and the exit pair is lowest. The reply route is built as
follows:

1. Take the hop pairs in reverse order.
2. Invert each pair.
3. Append the inverse of the last pair as the new exit pair.

The receiver must know h, or the hop count must be carried in the payload. The
testbenches build replies this way, send them, and check that they arrive back
at the sender.

## Mesh router (`router`)

The router has five `noc_switch` input modules and five `noc_merge` output
modules. The switch on port p is wired to the merges of the other four ports.
Every merge therefore has exactly four inputs.

* **`noc_switch`:**
  * `conv_2to4` turns the link transition into a 4-phase request.
  * `linear_ctrl` loads the flit register and raises its right request.
  * The top address pair selects one of four request outputs (the
    demultiplexer).
  * The flit leaves with its address rotated.
  * The acknowledgements of the four merges are ORed back, since only one can
    be active at a time.
* **`noc_merge`:**
  * An N-input `mutex` grants one request.
  * The grant selects the data input and connects that request to
    `conv_4to2`. The converter loads the output register, toggles the link
    request and acknowledges the merge.
  * The grant is held until both the request and the converter's acknowledge
    have returned to zero. This takes the place of the C-elements in the
    asynchronous merge. It also makes sure a second request cannot reach the
    converter early.

`conv_4to2` follows the converter's formal specification state by state. It
acknowledges the merge as soon as the flit is on the link, which makes it a
one-flit pipeline stage. It will not load another flit until the link
acknowledge has toggled.

Without contention, a flit goes from the link request in to the link request
out in about six clock cycles.

## Virtual-channel router and the refusal mechanism (`router_vc`)

In a torus with plain XY routing, each ring forms a cycle of buffers that can
deadlock. This router breaks the cycle in two ways.

**Two virtual channels.**

* Every packet starts on channel 0. The channel bit is the flit MSB.
* `noc_torus` forces the channel bit to 1 on every wrap link. This is the only
  place a packet changes channel.
* Within a router a flit stays on its channel.

**Refusal instead of waiting.** An input port that cannot take a flit on the
flit's channel does not stall the link. It answers with a *nack*: a transition
on `ln`/`rn` instead of the acknowledgement. The sender then lets the other
channel use the link.

The parts of a network port:

* **`switch_nack` (input).**
  * A channel latch holds the channel bit. It is open only while no handshake
    is in progress.
  * The latched bit steers the 4-phase request to one of two `narb`
    controllers, one per channel. Each channel has its own flit register and
    its own direction demultiplexer.
  * Address rotation skips the channel bit.
* **`narb` (non-blocking arbiter).** A latch controller for one channel. It
  follows the 22-state formal specification (S0..S21). It behaves like a plain
  linear controller until a new request arrives while the previous flit has
  been acknowledged on the left but not yet taken on the right. It then
  refuses the new request on `ln` instead of waiting.
* **`merge_virtual` (output, one per channel).** Works like the plain merge,
  but with a `linear_ctrl` and an output register. It offers one flit of that
  channel to the pipeline stage.
* **`merge_pipeline` (output).**
  * A 2-input `mutex` chooses between the two channels and passes the granted
    flit to `conv_4to2_nack`, which drives the link.
  * On an acknowledge, the channel's flit is gone.
  * On a refusal, the refused channel's request is withdrawn from the
    converter. If the other channel is waiting, the refused one is masked out
    of the mutex until the other channel has been granted. The refused flit
    stays in its `merge_virtual` register and is offered again later. This is
    the step that breaks a "channel 0 waits for channel 1 waits for channel 0"
    cycle on a wrap link.
* **`conv_4to2_nack`.** Sends the flit as a link transition. It reports the
  link's answer (`ra` or `rn` toggle) back as 4-phase `la` or `ln`.

The core port has no refusal:

* A plain `noc_switch` reads its address below the channel bit and feeds
  channel 0 of the four network merges.
* An 8-input `noc_merge` collects both channels of the four network switches.

## Networks (`noc_mesh`, `noc_torus`) and the top (`noc_top`)

**Layout.** Node i = y·N + x. x grows to the East and y grows to the South.
Input port p of a router listens to the neighbour in direction p. That
neighbour sends on its port 3-p, the opposite direction.

* **Mesh edges:** the edge ports are tied off.
* **Torus edges:**
  * Opposite edges are joined by wrap links, and each wrap link sets the
    channel bit.
  * The refusal wires run beside the acknowledgement wires.
  * The torus with RC wrap wires, the torus with transmission-line wrap wires
    and the folded torus all have the same connectivity. This one netlist
    stands for all three; only wire lengths and delays differ.

**Top.** `noc_top` puts both networks side by side, each with its own ports.
Every node has a `route_encoder` as its network interface.

| Ports | Handshake | Meaning |
|---|---|---|
| `*_inj_req` / `*_inj_ack` | 2-phase | Inject one flit. |
| `*_inj_dst` | — | Destination node as `{y, x}`. |
| `*_inj_payload` | — | Payload of the flit. |
| `*_ej_req` / `*_ej_ack` | 2-phase | Deliver the whole flit on `*_ej_flit`. |

The delivered address holds the return route. A node must not address itself.

## Timing model and conventions

* **Clock and reset.** One clock `clk` drives everything. `rst_n` is an
  asynchronous active-low reset that returns every controller to idle with all
  handshake wires low.
* **Events.** An input "event" is a wire level that differs from the level last
  taken. An event is held until the controller's current state can take it, as
  a C-element or an asynchronous state machine would hold it.
* **Order choices.** Where the specification allows two outputs in either
  order, both fire in the same cycle. Where an input and an output are both
  possible, the input is taken first.
* **Mutexes.** They grant round robin. The asynchronous mutex resolves ties
  arbitrarily.
* **Assertions.** The mutex checks that its grant is one-hot.

## Where this RTL departs from the source design

* **Clocked controllers.** The original circuits are clockless. Relative-timing
  constraints, transparent-latch tricks (for example, the early-open direction
  bits of the switch latch) and early acknowledgement paths are not modelled.
* **Links.** 1 mm, 1.75 mm and 7 mm RC wires and 7 mm transmission lines are
  plain wire bundles here, with no delay or energy.
* **`switch_nack`.** The original orders each channel's request against its
  right acknowledgement with a small mutex. Here the clocked controller takes
  one event per cycle, which gives the same ordering, so there is no separate
  mutex.
* **`conv_4to2_nack`.** It uses one state machine and one request wire instead
  of two machines whose outputs are XORed. The link sees the same transitions.
* **Route table.** Routes are computed by logic (`route_encoder`) instead of
  being stored as a table at the sender.
* **Reading choices.** Two readings of the specifications are this design's:
  * In the 4-to-2-phase converter, one state is read as "wait for the link
    acknowledge, then load the new flit".
  * In the non-blocking arbiter, the output of state S19 is read as the right
    request.
* **Parts not built:**
  * the repipelined virtual-channel router used in the 4x4 comparison;
  * the traffic generator and analyser software around the networks.

## Testbenches

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_mutex`, `tb_linear_ctrl`, `tb_narb`, `tb_conv_*` | Protocol order, latencies and data hold. The arbiter test counts refusals and checks each one is legal. |
| `tb_noc_switch`, `tb_noc_merge`, `tb_switch_nack`, `tb_merge_virtual`, `tb_merge_pipeline` | Steering, rotation, contention, refusals and the channel that passes after a refusal. |
| `tb_router`, `tb_router_vc` | Random traffic on all ports against a model of the steering. |
| `tb_route_encoder` | Every source/destination pair of the 8x8 mesh and torus, walked hop by hop; diameters 14 and 8. |
| `tb_noc_mesh`, `tb_noc_torus` | 4x4 request/reply traffic, where replies use the rotated return address. |
| `tb_noc_top` | Both 8x8 networks at default parameters. |

`tb_noc_top` sends uniform random traffic of 10-flit messages from every node.
It checks delivery, uniqueness, order and the return route. It counts the
following and fails if any stays at zero:

* mesh contention
* torus contention
* wrap crossings
* refusals
* channel passes after a refusal

Example commands with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/noc_pkg.sv tb/tb_noc_top.sv --top-module tb_noc_top
./obj_dir/Vtb_noc_top
```

Replace `tb_noc_top` with any other testbench name. The full-size test builds
in about a minute and simulates in well under a second. To change network
sizes, use the `N` parameter of `noc_mesh`/`noc_torus` or `MN`/`TN` of
`noc_top`. The widths in `noc_pkg` (`MESH_ADDR_W`, `TORUS_ADDR_W`) must cover
2·(worst-case hops + 1) bits.
