# Circuit-switched permutation network for a 16-node MPSoC

Sixteen processors exchange data over a three-stage Clos network built
from twelve 4x4 switches. The network does not forward packets. A sender
first reserves a complete path to its receiver. A probe searches the
network for a free path and backtracks out of blocked links. The data then
streams over the reserved wires with a fixed latency and full link
bandwidth. The path is released only when the sender lets go of it. The
switches need no queues, so each switch is small: twelve switches hold the
sixteen paths of a complete permutation at the same time.

This RTL implements the published description of such an on-chip
permutation network. That description covers the topology, the link
handshake, the per-stage probe routing rules, the switch architecture and
a FIFO-based node wrapper. Where it is silent, this implementation makes
its own choices. They are listed below under "Departures and own choices".

## Topology and addressing

The network is the Clos network C(4,4,4). It has four first-stage, four
second-stage and four third-stage switches, each with four ports.

- Node address `D3D2D1D0` (4 bits).
- Network input `a` enters first-stage switch `a[3:2]` on port `a[1:0]`.
- Network output `d` leaves third-stage switch `d[3:2]` on port `d[1:0]`.
- Output `k` of first-stage switch `s` feeds input `s` of second-stage
  switch `k`. The second and third stages are wired the same way.

So every input reaches every output over exactly four paths, one through
each second-stage switch. The choice of second-stage switch is the only
freedom a path has. Once that switch is chosen, the destination address
fixes the rest of the path: the second stage routes on `D3D2` and the
third stage on `D1D0`.

## The link and its handshake

Every link between two switches, and between a node and the network, has
three parts:

| signal | width | direction | meaning |
|---|---|---|---|
| Req  | 1  | forward  | 1 = set up / hold the path, 0 = idle / release |
| Ans  | 2  | backward | 00 idle, 01 Ack, 10 Back, 11 nAck |
| Data | 17 | forward  | `Data<16:1>` word, `Data<0>` strobe |

- **Ack**: the destination is ready. When Ack reaches the source, the path
  is set up and the data can start.
- **Back**: the link is blocked. The probe must back up one stage.
- **nAck**: the destination (or its output port) cannot take data now. The
  receiver also uses nAck during a transfer to pause the sender.

During setup, the probe's destination address travels on the data lines,
on `Data<4:1>`. No separate probe wires are needed.

## Path setup: probing with backtracking

The three kinds of switch differ only in how their input controls route a
probe:

- **First stage.** Take the lowest-numbered idle output that has not been
  tried yet, in the order 0-1-2-3. If the second stage answers Back, or the
  probe loses arbitration inside the switch, release that output and try
  the next one. Because the list of tried outputs only grows, the search
  can never loop (no live-lock). When all four outputs have been tried, the
  first stage answers Back to the source.
- **Second stage.** Request output `D3D2`. If it is busy, or the probe
  loses arbitration for it, answer Back.
- **Third stage.** Request output `D1D0`. If it is busy, or the probe loses
  arbitration, answer nAck: the destination port is taken, and no other
  path could help.

Ack and nAck are relayed upstream one switch per cycle. A switch keeps a
path held until the source drops Req. Each switch then releases its part
in turn.

### How long a setup takes

- A forward probe step takes two cycles:
  - the input control registers its request on the rising edge;
  - the arbiter decides on the falling edge;
  - the output control raises Req on the next rising edge;
  - the next switch samples it one rising edge later.
- A backtrack (Back from the second stage, then a new request) costs three
  cycles.
- An answer moves upstream one switch per cycle.

In simulation the longest setup seen, from Req at the network input to Ack
there, was 19 cycles. The original test plan allows 28 cycles per setup,
so 16 setups launched one after another take 448 cycles for a full
permutation.

### Blocking: read this before relying on the network

C(4,4,4) is *rearrangeable*: some assignment of paths exists for every
permutation. But this network never rearranges paths it already holds. It
sets paths up one by one, and each probe takes the first free path it
finds. So a probe can find all four of its paths blocked, even though
input and output are both idle.

In one run of 10,000 random full permutations (`tb_clos_workload`), 8.6%
of the 160,000 setups ended this way. Only 38.5% of the permutations were
arranged with no setup blocked. The testbench checks every such case
against an exact model of link use, and in each one no free path really
exists. The source then gets Ans=Back, the
wrapper reports "blocked", and software must retry, for example after
other paths are released.

The original description claims that backtracking always finds a path.
The model shows that this claim does not hold for sequential setup without
rearrangement. Rearrangement is not described, so it is not built.

## Inside a switch

```
           Request bus          Control bus
  IC 0..3 ------------> ARBITER ------------> OC 0..3 --> Req_out, crossbar select
     ^   <------------    ^  (falling edge)      |
     |     Grant bus      |                      v
  Req_in/Ans_in      Status bus <---------- busy flags
  Data_in ---------------> CROSSBAR (4 output muxes) ---------> Data_out
```

- **Input control (IC)** `ps_input_ctrl`: a finite-state machine running
  the routing rule of its stage. It has four states: idle, requesting,
  forwarding (path held), and holding a refusal until Req falls.
- **Arbiter** `ps_arbiter`: runs on the falling edge.
  - It grants a free, idle output to the lowest-numbered IC that asks for
    it. All other ICs asking for that output see Back.
  - An IC keeps its output as long as it keeps asking for it.
  - It routes each owned output's Ans back to its IC (the grant bus).
  - A freed output is granted again only after its output control has
    shown it idle, so Req on a link is low for at least one cycle between
    two owners. The downstream switch therefore always sees a release.
- **Output control (OC)** `ps_output_ctrl`: one rising-edge register per
  output. It turns the arbiter's decision into Req_out, the crossbar select
  and the busy flag on the status bus.
- **Crossbar** `ps_crossbar`: one multiplexer per output. An output that
  is not part of a path drives zeros.

The data path is combinational through all three crossbars. Once a path
is set up, a word goes from the source's link register to the
destination's link register with no queuing.

## Node wrapper

`ni_wrapper` connects a processor's 16-bit system bus to one network input
and one network output. It holds:

- a control register and a status register;
- a Tx circuit and an Rx circuit, each built around a FIFO;
- the network interface state machine (idle, address, setup, connected,
  blocked).

The processor is not part of this RTL. Its bus is brought out at the top
level.

| addr | reg | access | bits |
|---|---|---|---|
| 0 | CTRL   | R/W | [3:0] destination, [4] setup, [5] Tx FIFO to network, [6] Rx FIFO to bus, [7] Rx enable, [8] clear overflow (write 1) |
| 1 | STATUS | R   | [0] path set, [1] nAck seen, [2] blocked, [3] Tx empty, [4] Tx full, [5] Rx empty, [6] Rx full, [7] incoming path held, [8] Rx overflow |
| 2 | TXDATA | W   | push a word into the Tx FIFO |
| 3 | RXDATA | R   | head of the Rx FIFO; the read pops it |

A transfer from software's point of view:

1. Write the words to TXDATA.
2. Write CTRL with the destination, setup = 1 and "Tx FIFO to network".
3. Wait for STATUS[0] (path set) and then STATUS[3] (Tx empty).
4. Clear setup to release the path. If STATUS[2] (blocked) comes up
   instead, clear setup and retry later.

The receiving node answers an incoming Req as follows:

- Ack while its Rx enable is set, it is in receive mode, and more than
  `RX_SKID` FIFO slots are free.
- nAck otherwise. A sender that sees nAck pauses, and it resumes on Ack.

The skid space takes the words already in flight during the nAck round
trip. Software reads the Rx FIFO by setting CTRL[6], and should clear it
again afterwards.

**Strobe.** Each word sent toggles `Data<0>` once. The receiver writes
one word per strobe transition. The strobe does not move while the Tx FIFO
is empty or the sender is paused.

**Pipeline stages.** `ss_pipe_stage` registers all 17 data lines, strobe
included. The top places one stage between each wrapper and the network,
in each direction. Because of that stage, the wrapper puts the probe
address on the data lines one cycle before it raises Req.

## Departures and own choices

From the original description:

- the Clos C(4,4,4) topology and its addressing;
- the Req/Ans encoding;
- the per-stage routing rules and the non-repetitive 0-1-2-3 search;
- "losing arbitration counts as Back";
- the IC/arbiter/OC/crossbar structure, with ICs on the rising edge and
  the arbiter on the falling edge;
- 16-bit FIFOs with a strobe on `Data<0>`;
- the 28-cycle setup spacing.

This implementation's own choices:

- **One clock.** The original wrapper switches each FIFO's clock with a
  multiplexer: bus clock versus Tx clock, and strobe versus read clock. Its
  source-synchronous stages clock their data flip-flops with the travelling
  strobe. Here everything runs on one system clock. The strobe becomes a
  toggle that marks each word, and each pipeline stage is an ordinary
  register. The Rx FIFO can be written and read in the same cycle, so no
  word in flight is lost when software starts reading.
- **What happens at the end of a failed search.** A first stage that runs
  out of outputs answers Back. A second stage answers Back and a third
  stage answers nAck. All of them wait for Req to fall.
- **Arbitration priority**: fixed, with IC 0 highest.
- **Sizes**: FIFO depths (Tx 16, Rx 32), Rx skid space (8), the register
  map, and the bit positions of the probe address.
- **Reset**: asynchronous, active low, to idle everywhere.
- **Pipeline stages on a link**: one at each end of the network. The
  original does not say how many stages a link has.
- **Blocking**: handled as described above. Held paths are never
  rearranged.
- **One network.** The original notes that the switches are small enough
  to stack several networks for concurrent permutations. It does not
  describe such a stack, and none is built here.

## Files

- `rtl/perm_pkg.sv`: Ans encoding, widths, probe helpers.
- `rtl/ps_crossbar.sv`, `rtl/ps_output_ctrl.sv`, `rtl/ps_arbiter.sv`,
  `rtl/ps_input_ctrl.sv`: the parts of a switch.
- `rtl/ps_switch.sv`: one switch; parameter `STAGE` = 1, 2 or 3.
- `rtl/clos_network.sv`: the 16x16 network.
- `rtl/sync_fifo.sv`, `rtl/tx_circuit.sv`, `rtl/rx_circuit.sv`,
  `rtl/ni_wrapper.sv`: the node wrapper.
- `rtl/ss_pipe_stage.sv`: the link pipeline stage.
- `rtl/perm_noc_top.sv`: the top level, with 16 wrappers and the network.
  Ports: `clk`, `rst_n` and one bus per node (`bus_addr[16]`,
  `bus_wr[15:0]`, `bus_wdata[16]`, `bus_rd[15:0]`, `bus_rdata[16]`).
- `tb/tb_<module>.sv`: one self-checking testbench per module.

Parameters of the top: `TX_DEPTH` (16), `RX_DEPTH` (32), `RX_SKID` (8).
`RX_SKID` must cover the nAck round trip, about 8 words with one pipeline
stage per side. The network size is fixed by the constants in `perm_pkg`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb rtl/perm_pkg.sv \
    tb/tb_perm_noc_top.sv --top-module tb_perm_noc_top -Mdir obj -o sim
obj/sim
```

Substitute any other testbench name. The modules are found by file name
through `-y rtl -y tb`. `-Wno-fatal` keeps lint warnings, such as package
constants that a module does not use, from stopping the build.

## What the testbenches check

- `tb_clos_network` runs 300 random full permutations, with setups 28
  cycles apart.
  - An exact link-use model predicts which second-stage switch each probe
    must end up in, or that no path is free.
  - It checks the answer, the links the path holds, setup within 28 cycles
    and a full permutation within 448 cycles.
  - It checks that all 16 paths carry their own word at the same time.
  - Directed cases cover two probes contending in one switch, a
    destination answering nAck and then Ack, and two sources aiming at one
    destination.
- `tb_clos_workload` runs the same test at scale, with one set of 10,000
  random permutations. It takes about half a minute.
- `tb_perm_noc_top` tests the default-size top through the bus ports only.
  - It runs 100 random permutations with 16 tagged words per node, and
    retries blocked setups.
  - It runs a flow-control case: two transfers into one node, where the
    receiver pauses the sender and the transfer resumes after reading.
  - It launches all 16 setups in the same cycle.
  - It counts each mechanism and requires each to occur: backtracking, Back
    to the source, arbitration denial, nAck pause and delivery.
- The unit testbenches check each part against its own reference model or
  directed sequence:
  - the crossbar against a multiplexer model;
  - the arbiter against an ownership model with random traffic;
  - the input control through the sequences of all three stages;
  - the output control's one-cycle retiming;
  - the FIFO circuits' order, flags, strobe rule and overflow;
  - the wrapper, looped back on itself.

What is not verified:

- timing or area on silicon;
- the strobe-clocked stages of the original (not built);
- the original's figure of ten sets of 10,000 permutations. The
  testbenches run one set of 10,000 on the network alone, and 100
  permutations with data on the full top.
