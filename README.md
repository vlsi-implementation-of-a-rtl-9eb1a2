# A packet-connected-circuit switch for on-chip networks

On-chip networks usually move data as packets, which forces switches to
buffer whole packets or to use virtual channels, and makes latency hard to
bound. The switch here takes a different route: a short header travels
through the network like a packet, but each switch it passes *locks* the
path it took. Once the header has reached its destination the payload flows
over that locked circuit with no buffering at all, one register per switch,
until the sender releases the circuit. There is no global arbiter: every
switch decides locally from its own state.

This repository holds synthesizable SystemVerilog for such a switch in the
small configuration of a demonstration chip: three ports, 4-bit (nibble)
data, source routing and fixed priority. It also holds the chip itself, two
switches linked to each other plus two on-chip test pattern generators.

## The port and the packet

Each port of a switch is a pair of directions. Towards the switch run
`req` and a 4-bit `data` nibble; away from it runs `nack`. The output side
of a port carries the same three signals the other way.

A sender opens a circuit by raising `req` and, in the same cycle, placing
the first **route nibble** on `data`. Its two low bits name the output port
(0, 1 or 2) of the first switch. The route nibbles for the following
switches come next, one per cycle, and the payload follows straight after
the last route nibble. The sender keeps `req` high for as long as it sends
and lowers it after the last payload nibble, which tears the circuit down.

Each switch consumes exactly one route nibble: what leaves it starts with the
nibble that followed. Example, with three switches in a row routed 1, 0, 2:

```
cycle           0   1   2   3   4   5   6   7   8 ...
sender  req     1   1   1   1   1   1   1 ...
sender  data    1   0   2   d0  d1  d2  d3 ...
after switch 1 (output 1):      req from cycle 2, data 0 2 d0 d1 ...
after switch 2 (output 0):      req from cycle 4, data 2 d0 d1 ...
after switch 3 (output 2):      req from cycle 6, data d0 d1 d2 ...
```

So `req` appears two cycles later at each switch, while every payload nibble
arrives just one cycle later per switch. When `req` falls at the sender the
circuit is released switch by switch, one cycle apart, and the receiver sees
`req` fall immediately after the last nibble.

If an output a header asks for is already in use, or the route names port 3
(which does not exist), the switch answers with a one-cycle `nack` and drops
the request. `nack` also travels back along a circuit that is already up, so
a refusal further down the route reaches the sender (one cycle per switch).
A sender that receives `nack` must lower `req` and try again later: requests
are not queued and not retried by the switch.

## Inside one switch

```
           in 0..2 (req, data)                   out 0..2 (req, data)
               |                                        ^
               +--> crossbar (3 x 3 cells) --> retiming register
               |         ^   | nack back           (one per output)
               v         |   v
        input control blocks (ICB 0..2)  <--->  output control block (OCB)
         edge detector, decision logic,          busy register, priority
         state register, decoder                 chain, release chain
```

**Input control block (`icb`), one per input.** An edge detector compares
`req` with its value in the previous cycle. On a rising edge the low two bits
of the current nibble are decoded one-hot and offered to the OCB as a
build-up request. The OCB's reply for that output decides the outcome: if
granted, the two-bit *state register* loads the route at the clock edge;
otherwise the ICB drives `nack` in the next cycle. On a falling edge the ICB
sends the OCB a tear-down order for the output named in the state register
and clears it. The state register's value 3 names no port and is used as
"no connection"; clearing loads 3. A decoder turns the state register into
three crossbar control lines.

**Output control block (`ocb`).** This is where simultaneous requests are
resolved, and it is the part of the switch that takes the most thought. A
register holds one busy bit per output. Its value passes through a chain of
three identical decision logic blocks (`ocb_dlb`), one per ICB in order of
port id. Each block grants its ICB's request if the requested output is
still free *in the status it received*, and passes on the status with that
output marked busy. Input 0 therefore always beats inputs 1 and 2, and input
1 beats input 2, when they ask for the same free output in the same cycle.
A second chain ORs the tear-down orders of the three ICBs into a release
mask. At the clock edge the register takes the output of the request chain
with the released outputs cleared.

Consequences worth knowing:

* Replies are combinational within the cycle of the rising `req`. The
  critical path runs through the whole DLB chain and grows linearly with the
  port count.
* An output released in cycle *e* is free for a new header from cycle *e+1*.
  A header that asks for it in cycle *e* itself is refused, because the
  chain still sees the old register value.
* A circuit is never pre-empted. A later request, even from a
  higher-priority input, is refused while the circuit is up.

**Crossbar (`crossbar`, `xbar_cell`).** Nine identical cells. Cell
(*i*, *j*) is closed by control line *j* of ICB *i*. When closed, it passes
`req` and `data` from input *i* to output *j*, and `nack` from output *j*
back to input *i*. Open cells output zero, and each output is the OR of its
column. The OCB keeps at most one cell per column closed, and an assertion
in `pcc_switch` checks that the closed cells match the busy register.

**Retiming.** `pcc_switch` registers the crossbar's `req` and `data` for
each output, and the `nack` entering each output. This register is all the
buffering a circuit has. It also explains the timing in the example above.
A header rising in cycle *t* is granted in cycle *t*, and the crossbar is
closed from *t+1*. The nibble sent in cycle *t+1* (the first one after the
route) is registered, so `req` and that nibble appear at the output in cycle
*t+2*.

## The demonstration chip (`pcc_chip`)

```
          pins (port 1)                   pins (port 1)
              |  ^                            |  ^
        +-----v--+-----+  out0 -> in0   +-----v--+-----+
        |   switch A   |--------------->|   switch B   |
        |              |<---------------|              |
        +------^-------+  in0 <- out0   +------^-------+
               | in2   (out2 unused)           | in2   (out2 unused)
        test sequence gen A              test sequence gen B
```

Port 0 links the two switches in both directions, with each link's `nack`
running opposite to its data. Port 1 of each switch goes to the pins. Input
2 is driven by a test sequence generator (`tsg`). Output 2 is left
unconnected; lint reports its bits as unused for that reason.

A rising edge on a generator's `start` makes it send one packet in the next
cycle: route 1, then the nibbles 1, D, A, 8, 4, 2. The packet therefore
appears at its switch's port-1 pins as `1 D A 8 4 2`, three cycles after the
start edge. The generator ignores `start` while a packet is in progress and
does not react to `nack`. Its nack wire is brought out as `tsg_a_nack` /
`tsg_b_nack` so that refusals can be observed.

A packet entering B's pins with route nibbles `0, 1` crosses B, then A, and
leaves at A's pins. This is the cascaded path through both switches.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NPORTS`  | 3 | ports per switch; must stay below 2**`ADDR_W` because the top code means "no connection" |
| `DATA_W`  | 4 | nibble width |
| `ADDR_W`  | 2 | route bits taken from the first nibble |

The defaults live in `pcc_pkg`, together with the generator's route and
sequence. `pcc_switch`, `icb`, `ocb` and `crossbar` are written for any
`NPORTS`. `pcc_chip` is fixed at three ports because its wiring uses port
numbers 0, 1 and 2.

## Simulating

Every file in `rtl/` and `tb/` holds one module or package, named after the
file. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pcc_pkg.sv tb/tb_pcc_chip.sv \
          --top-module tb_pcc_chip -o sim && ./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. A
watchdog ends a run that hangs and counts it as a failure.

| testbench | what it checks |
|-----------|----------------|
| `tb_pcc_chip` | the whole chip at default size: simple circuits on both switches; both generators; cascaded B->A routing; non-preemption; priority of input 1 over 2 and of 0 over 1; a nack returned through both switches; route 3 refused; a nack from the output pins returned to the input pins. It checks the payload and the exact cycle of every stream and nack, and that each mechanism occurred. |
| `tb_fig3_example` | three switches routed 1, 0, 2. The receiver sees the payload 6 cycles after the sender's `req`. While that circuit is up, a second sender's request for the busy output is refused and its request for a free one is delivered. |
| `tb_pcc_switch` | 5000 cycles of random traffic against a cycle-level reference model. Grants, busy refusals, same-cycle priority refusals, bad routes, tear-downs and returned nacks must all occur. Then a directed packet checks the route-nibble stripping and the two-cycle `req` delay. |
| `tb_icb`, `tb_ocb`, `tb_ocb_dlb`, `tb_crossbar`, `tb_xbar_cell`, `tb_edge_detector`, `tb_tsg` | each block against an independent reference, exhaustive where the input space is small |

## What is taken as given, and what was chosen here

These parts follow the chip as it was described: three ports, nibble data,
the route in the two low bits and consumed per switch, fixed priority by
port id, no pre-emption, `nack` on refusal, and the ICB and OCB structure.
That structure covers the edge detector, state register and decoder, the
chain of decision blocks, the release chain with its register update, and
the nine-cell crossbar that carries `nack` backwards. The chip's wiring and
the generator's packet also follow that description.

The following are choices made in this implementation. Change them if your
network needs otherwise:

* **Timing of the retiming register.** The payload costs one cycle per
  switch. `req` costs two cycles at the front and one at the back, which
  removes exactly the route nibble.
* **`nack` shape.** One cycle long, in the cycle after the refused header.
  A returned `nack` is registered once per switch. Without that register,
  the two chip switches, linked both ways, would form a combinational loop
  through both crossbars.
* **Route 3 is refused**, and 3 doubles as the idle code of the state
  register.
* **Reset.** Active-low and asynchronous. It clears all connections, busy
  bits, output registers and `req` history. A `req` that is already high
  when reset ends counts as a new header.
* **Generator.** Starts on the rising edge of `start`, sends zeros while
  idle, and has no `nack` input.
* **Switches as gates.** The original crossbar cells are pass-transistor
  switches. Here they are AND gates whose outputs are ORed.

Not implemented:

* the I/O pads of the chip;
* the format-conversion wrappers between IP blocks and the network;
* the fuller switch of a production network: five ports, 8-bit data,
  adaptive routing with round-robin choice among productive outputs, and a
  pipelined or merged priority chain.
