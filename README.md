# Circuit-switched three-stage permutation network (16 nodes)

This is a network-on-chip for a 16-core MPSoC. Any of the 16 nodes can send to
any other, and all 16 can send at the same time as long as every destination
is different: the network realises an arbitrary permutation. It is circuit
switched. A source first sets up a dedicated path through three stages of
small switches. It then streams its words over that path, one per clock, with
no buffering in the switches. Finally it tears the path down.

The path is not computed centrally. A *probe* carrying the destination address
walks through the network and claims one link at each stage. When it runs into
a link that is already taken, it **backtracks**: the switch that cannot go on
hands the probe back to the previous switch, which tries another route. This
run-time probing with backtracking is the core of the design. Most of this
document explains it.

## Topology

The network is a three-stage Clos-type network c(m, n, p) = c(4, 4, 4). It has
twelve 4x4 switches in three columns:

```
 nodes 0-3   -> input switch 0 --\ /-- middle 0 --\ /-- output switch 0 -> nodes 0-3
 nodes 4-7   -> input switch 1 ---X--- middle 1 ---X--- output switch 1 -> nodes 4-7
 nodes 8-11  -> input switch 2 ---X--- middle 2 ---X--- output switch 2 -> nodes 8-11
 nodes 12-15 -> input switch 3 --/ \-- middle 3 --/ \-- output switch 3 -> nodes 12-15
```

- Output `j` of input switch `i` goes to input `i` of middle switch `j`.
- Output `k` of middle switch `j` goes to input `j` of output switch `k`.
- Node `a` enters at input switch `a/4`, port `a%4`. It is reached at output
  switch `a/4`, port `a%4`. So address bits [3:2] select the output switch
  and bits [1:0] select its port.

Routing freedom exists only in the first stage. A probe may take any of the
four middle switches. After that the path is fixed: the middle switch must use
its single link to output switch `dest/4`, and that switch must use port
`dest%4`. Two circuits conflict in a middle switch when they come from
different input switches and head to the same output switch. Backtracking
resolves that conflict by moving one of them to another middle switch. With
m = n = 4 the network is rearrangeably non-blocking: every permutation has a
set of non-conflicting paths. Probing, however, finds paths one at a time and
never moves an existing circuit. So an unlucky order of set-ups can still
leave a probe blocked, and it is then retried from the source.

## The link handshake

Every link carries a request forward, an answer backward, and a *flit*
forward. The flit holds the data word, its valid bit and the 4-bit destination
address (the probe header). Codes are defined in `noc_pkg`:

| Signal | Code | Meaning |
|---|---|---|
| Req | `00` Idle | no circuit, or release of the circuit |
| Req | `01` Probe | set up this circuit and keep holding it |
| Ans | `00` | no answer yet |
| Ans | `01` Ack | the path reached the destination, which accepted |
| Ans | `10` Back | blocked further on; take another route |
| Ans | `11` nAck | destination busy; give up for now |

Ack = 01 and nAck = 11 are the published codes. Putting Back on the answer
wires, and the Probe code, are this design's own reading.

## Setting up a path: the Input Control

Each switch input has an Input Control (`input_ctrl`). It is a state machine
clocked on the rising edge:

| State | Answer sent back | Leaves when |
|---|---|---|
| Idle | none | Req = Probe: decode the destination into the *route-probing table* and go to Probing |
| Probing | none | see below |
| ACK | Ack | after one clock, to Transmit |
| Transmit | Ack | Req = Idle (release): back to Idle |
| Backtrack | Back | Req = Idle: back to Idle |
| nACK | nAck | Req = Idle: back to Idle |

The route-probing table is the set of outputs still worth trying. It starts
as all four outputs in the first stage, and as the one allowed output in the
later stages (`route_decoder`). In Probing:

- **Without an output**, the IC asks the arbiter for any table entry that is
  currently free. If no entry is free, the network is blocked with no port
  left. The IC then goes to Backtrack, or to nACK in the last stage, where the
  only port is the destination itself.
- **Holding an output**, the IC waits for the downstream answer:
  - Ack goes to ACK.
  - nAck goes to nACK, and the output is released.
  - Back means blocked further on. That output is struck from the table and
    released. The IC stays in Probing and tries what is left. The table thus
    records where backtracking has already been.

When an IC leaves the holding states (to Idle, Backtrack or nACK), it drops
its output. The downstream request turns Idle, and that releases the next
switch in turn. So releases ripple down the path on their own. A failed probe
leaves no stale reservations behind.

### Example

Node 4 already has a circuit to node 4 through middle switch 0. Node 0 now
probes for node 5.

1. Input switch 0 grants the lowest free output, the link to middle switch 0.
2. That switch's IC needs output 1, to output switch 1. Node 4's circuit
   already holds it, so the IC goes to Backtrack and answers Back.
3. Input switch 0 strikes middle switch 0 from its table and releases the
   link. It is then granted middle switch 1, and the probe reaches node 5.
4. Node 5 answers Ack. The Ack travels back, and node 0 starts sending.

If all four middle switches back off, the input switch itself backtracks to
node 0. Node 0 then retries later.

## Inside a switch

`clos_switch` holds these parts:

- **4 Input Controls.** The probe state machines above. Each contains its
  address decoder.
- **4 Output Controls** (`output_ctrl`). A retiming register for the request
  sent downstream and for the answer coming back. An output is offered again
  only when three things hold: nobody owns it, its registered request is Idle,
  and its registered answer has returned to none. This guarantees that the
  downstream IC sees a release between two circuits, and that a late answer
  never reaches the next owner.
- **The arbiter** (`switch_arbiter`). It is clocked on the falling edge, half
  a cycle after the ICs have posted their requests. On each edge it frees the
  outputs whose owners dropped `hold`. It then grants one waiting IC the
  lowest-numbered free output it asked for. The `scheme` input picks the
  winner and may change at run time:
  - round robin: search starts after the last winner;
  - dynamic priority: the input that has waited longest wins;
  - fixed priority: the lowest input index wins.
- **Encoders** (`grant_encoder`). They turn the arbiter's one-hot ownership
  into mux selects.
- **The crossbar** (`crossbar`). One combinational mux per output. An
  established circuit is a chain of muxes from source to destination. A word
  sent in one clock arrives in the same clock; the network does not pipeline
  or store it.

### Timing

A probe is seen by an IC on one rising edge and granted on the next falling
edge. The OC drives it downstream on the following rising edge. That is two
rising edges per switch, and the answer comes back through one register per
switch. A Back or nAck answer frees the link on the falling edge of the clock
in which it reaches the upstream switch: the IC drops `hold` as soon as it
sees the answer. It also remembers which output it probed, so that on the
next rising edge it can still act on the answer, although the arbiter has
taken the output back.

In the end-to-end test, a transfer into an idle network delivers its first
word 15 clocks after `tx_start`. After that, one word arrives every
clock. The whole path is combinational from source register to receiver, so
the achievable clock depends on three mux levels plus wiring. The published
design reports about 100 MHz.

## Network interface

`net_iface` is the wrapper between a node and the network.

**Transmit.** `tx_start` latches `tx_dest` and `tx_len`, and the interface
probes. On Ack it sends `tx_len` words, one per clock. `tx_pop` marks each
clock that takes `tx_data`. It then releases the circuit. On nAck or Back it
releases, waits `RETRY_GAP + node index` clocks, and probes again; this spreads
the retries of different nodes. `tx_done`, `tx_nack` and `tx_back` are
one-clock pulses. The circuit is held for the whole transfer.

**Receive.** An incoming probe is answered with nAck if `rx_busy` is high,
and with Ack otherwise. The answer holds until the release. Words arrive on
`rx_valid`/`rx_data`.

## Parameters

| Where | Parameter | Default | Meaning |
|---|---|---|---|
| `perm_network` | `M`, `N`, `P` | 4, 4, 4 | middle switches, nodes per edge switch, edge switches |
| `perm_network`, `net_iface` | `LEN_W` | 8 | width of the transfer length (up to 255 words) |
| `perm_network`, `net_iface` | `RETRY_GAP` | 4 | base back-off in clocks |
| `noc_pkg` | `ADDR_W`, `DATA_W` | 4, 32 | address and data widths |
| `switch_arbiter` | `AGE_W` | 4 | age counter width of the dynamic-priority scheme |

`N*P` must fit in `ADDR_W` bits, and elaboration stops with an error if it
does not. The 32-bit data width is a choice. The published design quotes
about 30 Gbit/s at 100 MHz. Across 16 nodes that needs at least 19 bits per
word. With 32 bits, 16 streaming circuits carry 51.2 Gbit/s at 100 MHz, not
counting set-up time. `DATA_W` can be narrowed; only the test data patterns
assume 32 bits.

## What follows the published design and what does not

Taken from it:

- the c(4,4,4) topology and its wiring;
- the switch's parts (input and output controls, one arbiter, a mux
  crossbar, encoder and decoder);
- the IC states and their transitions;
- rising-edge ICs and a falling-edge arbiter;
- OCs as retiming stages;
- the three arbitration schemes, selectable;
- the Ack and nAck codes;
- holding a circuit until the whole transfer is done.

Chosen here, because the published description does not fix them:

- the data width;
- Back on the answer wires;
- the arbiter's grant rule (one grant per clock, lowest free output);
- the dynamic-priority mechanism (waiting-time ages);
- the free-output rule of the OC;
- the one-clock ACK state;
- the whole network interface (protocol, retries, status pulses);
- which arbitration scheme runs: it is an input, not a fixed choice;
- synchronous active-high reset.

Departs from it:

- The published text also describes each switch as having four
  bidirectional ports to neighbouring switches plus one port to a local core,
  as in a 2D mesh. This design follows the three-stage network instead:
  nodes attach only to the first and last stages, and links carry data in one
  direction.

Not modelled:

- the processing elements;
- the link transceivers that the original uses for wave-pipelined,
  source-synchronous forwarding. Here the crossbar is plain combinational
  logic.

## Files and simulation

| File | Contents |
|---|---|
| `rtl/noc_pkg.sv` | codes, flit type, state and scheme enums |
| `rtl/perm_network.sv` | top: 16 interfaces and 12 switches |
| `rtl/clos_switch.sv` | one switch |
| `rtl/input_ctrl.sv`, `rtl/route_decoder.sv` | probe state machine and address decoder |
| `rtl/output_ctrl.sv`, `rtl/switch_arbiter.sv`, `rtl/grant_encoder.sv`, `rtl/crossbar.sv` | the other switch parts |
| `rtl/net_iface.sv` | node interface |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl rtl/noc_pkg.sv tb/tb_perm_network.sv --top-module tb_perm_network
./obj_dir/Vtb_perm_network
```

`tb_perm_network` runs the network at its default size, end to end. It covers:

- a single transfer;
- a reroute after a middle switch backtracks;
- a backtrack all the way to the source while four long transfers hold every
  link into one output switch;
- two sources racing for one destination (nAck);
- a receiver refusing while busy;
- a random full permutation under each arbitration scheme.

`tb_perm_bandwidth` measures throughput. When all 16 circuits stream at once
it sees 16 words per clock, which is 51.2 Gbit/s at 100 MHz. With random
permutations of 255-word transfers it sustains 7.3 to 8.9 words per clock,
or 23 to 28.5 Gbit/s depending on the random seed, set-up and retries
included. The rate is lower because probing never rearranges existing
circuits. A transfer that finds every route blocked must wait until another
transfer ends.

The end-to-end test checks every word's destination and order. It also
checks that every word is received in the clock it is sent. It counts each
mechanism and fails if one never occurred. The unit testbenches walk every IC
transition, compare the arbiter against an independent model under random
traffic, and test each switch stage against scripted downstream answers.

Assertions in the RTL check that an output has at most one owner, that an
input holds at most one output, that no upstream releases a probe before
it has been answered, and that every received word carries the receiving
node's address.
