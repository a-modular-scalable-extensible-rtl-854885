# A self-managing packet buffer built from identical one-packet cells

This is a register-transfer model of the modular optical packet buffer from
*A Modular, Scalable, Extensible, and Transparent Optical Packet Buffer*. The
RTL is an independent model of that architecture; it is not the authors' code.

The buffer is a chain of identical modules. Each module can hold exactly one
packet. There is no controller: every module decides on its own, in every
timeslot, what to do with the packets that reach it. It looks at four bits:

- whether a packet arrives from below,
- whether it already holds a packet,
- whether a packet arrives from above,
- whether a read request arrives from below.

From these it decides which packet goes down, which it keeps and which goes
up, and whether it passes the read request on. Packets enter and leave only at
the bottom module (the *root*). Stored packets are pushed up the chain and
pulled back down on reads. Each module is programmed with one of two small
truth tables. With one of them the whole chain behaves as a first-in-first-out
queue; with the other it behaves as a last-in-first-out stack. Writes and
reads are independent and may happen in the same slot. The capacity is the
number of modules, and modules can be added at the top.

In the optical original, packets never leave the optical domain. Each module
is a partial 3×3 cross-connect of semiconductor optical amplifiers (SOAs)
used as on/off gates, plus one loop of fiber (a *fiber delay line*, FDL) that
holds a packet for one timeslot. A small programmable logic device runs the
truth table. This RTL models that system at slot level:

- one clock cycle is one timeslot;
- a packet is one word: a valid flag, a 7-bit label and an opaque 900-bit
  payload (one 90-ns packet at 10 Gb/s);
- each gate is a select line;
- each fiber delay is a register.

The routing logic is exactly the logic the physical system would run. The
rest shows where every packet is in every slot.

## The module and its nine gates

A module has three packet inputs: **D** from below, **B** from its own delay
line and **U** from above. It has three packet outputs: down, into the delay
line, and up. A full cross-connect would need nine gates, named
`<from>2<to>`, for example `D2U` or `B2B`. Each mode needs only a subset:

| mode            | gates not built  | gates built          |
|-----------------|------------------|----------------------|
| queue, any module | B2U, U2U       | 7                    |
| stack, root     | D2U              | 8                    |
| stack, above root | D2U, D2D       | 7                    |

`obuf_pkg::gates_needed()` computes this set. `cross_connect` passes nothing
through a gate that is not built. An assertion in `buffer_module` checks that
the routing logic never opens such a gate.

### Routing tables

D, B, U are packet present on that input; R is read request in; RO is read
request passed up. A module never holds a packet while another arrives from
above: a module above the root sends a packet down only after a read request,
and a read request first empties the module below. So the rows with B = U = 1
cannot occur. Those rows open nothing, and `buffer_module` asserts against
them. With nothing present, nothing happens and the read request stops there.

Queue (`MODE_FIFO`):

| D B U R | gates      | RO | what happens |
|---------|------------|----|--------------|
| 1 0 0 0 | D2B        |    | store the new packet |
| 0 1 0 0 | B2B        |    | keep the stored packet |
| 1 1 0 0 | D2U, B2B   |    | keep the old packet, send the new one up |
| 0 0 1 0 | U2B        |    | store the packet coming down |
| 1 0 1 0 | D2U, U2B   |    | store the packet coming down, send the new one up |
| 1 0 0 1 | D2D        |    | empty module: the new packet goes straight back down |
| 0 1 0 1 | B2D        | 1  | stored packet leaves, pull the next one down |
| 1 1 0 1 | D2U, B2D   | 1  | stored packet leaves, new one goes up |
| 0 0 1 1 | U2D        | 1  | packet coming down passes through |
| 1 0 1 1 | D2U, U2D   | 1  | packet coming down passes through, new one goes up |

Stack (`MODE_LIFO`):

| D B U R | gates      | RO | what happens |
|---------|------------|----|--------------|
| 1 0 0 0 | D2B        |    | store the new packet |
| 0 1 0 0 | B2B        |    | keep the stored packet |
| 1 1 0 0 | D2B, B2U   |    | push: keep the new packet, send the old one up |
| 0 0 1 0 | U2B        |    | store the packet coming down |
| 1 0 1 0 | D2B, U2U   |    | keep the new packet, send the returning one back up |
| 1 0 0 1 | D2D        |    | the new packet is the newest: it leaves at once |
| 0 1 0 1 | B2D        | 1  | pop the stored packet, pull the next one down |
| 1 1 0 1 | D2D, B2B   |    | the new packet leaves; nothing else moves |
| 0 0 1 1 | U2D        | 1  | the returning packet leaves, pull the next one |
| 1 0 1 1 | D2D, U2B   |    | the new packet leaves; the returning one is stored |

The two tables differ only in where a new packet goes. In a queue it climbs
to the first free module, so the oldest packet is always at the bottom. In a
stack it stays at the root and everything else moves up one module.

## Timing along the chain

Everything a module sends **up** reaches the next module **in the same
slot**: packets and read requests alike. In the optical system the upper
module simply acts a few nanoseconds later. In the RTL this is a
combinational ripple from the root to the top. Anything a module sends
**down** reaches the module below **at the start of the next slot**, through
a one-slot fiber (`fdl` between modules in `optical_packet_buffer`). A packet
in a delay line is likewise seen again one slot later. The root's down
output is the buffer output, with no delay. So a packet written and read in
the same slot leaves in that slot.

This asymmetry explains the one odd-looking rule in the queue table. Take a
queue of two modules that holds one packet. A write and a read arrive
together. The root sends its stored packet out and the new packet up, and
passes the request up. The second module is empty, and a request and a
packet reach it at once. It sends the packet straight back down (D2D in a
module above the root). The packet then spends one slot in the descending
fiber, which is in effect a one-packet store between the two modules.

### The illustrative sequences

Both sequences run on two modules, one operation per slot (W = write,
R = read, WR = both). The gates below are the ones each module opens, and
`tb_optical_packet_buffer` checks them slot by slot.

Queue, W W R – WR R WR –:

| slot | op | root            | module 1 | leaves |
|------|----|-----------------|----------|--------|
| 1    | W  | D2B             |          |        |
| 2    | W  | D2U, B2B        | D2B      |        |
| 3    | R  | B2D, RO         | B2D, RO  | p1     |
| 4    | –  | U2B             |          |        |
| 5    | WR | D2U, B2D, RO    | D2D      | p2     |
| 6    | R  | U2D, RO         | (empty)  | p3     |
| 7    | WR | D2D             |          | p4     |

Stack, W W R R W WR R –:

| slot | op | root            | module 1 | leaves |
|------|----|-----------------|----------|--------|
| 1    | W  | D2B             |          |        |
| 2    | W  | D2B, B2U        | D2B      |        |
| 3    | R  | B2D, RO         | B2D, RO  | p2     |
| 4    | R  | U2D, RO         | (empty)  | p1     |
| 5    | W  | D2B             |          |        |
| 6    | WR | D2D, B2B        |          | p4     |
| 7    | R  | B2D, RO         | (empty)  | p3     |

The longest stay is three slots: p2 in the queue and p1 in the stack. In the
102-ns-slot optical prototype that came to about 330 ns.

## Capacity and overflow

A chain of N modules holds N packets. When a packet is lost, it leaves the
top module on `up_out`. It is only lost if nothing is cascaded above.

- **Stack:** overflow happens when the stack is full and is written without
  a read. The push moves every packet up, and the oldest one falls out of the
  top. A write with a read never overflows, because the new packet leaves at
  once.
- **Queue:** overflow happens whenever the queue is full and is written,
  *including* when it is read in the same slot. In that slot the new packet
  climbs past every occupied module (rows `1 1 0 1` and `1 0 1 1`), and the
  read frees a place only at the bottom. The new packet is the one lost.

The original description of the architecture names only the no-read case for
both modes. This model follows the routing table, so a full queue with
simultaneous read and write loses one packet, and the testbench's reference
model expects that. To avoid the loss, keep one module more than the queue
needs to hold.

## Gates crossed per packet

In the optical buffer every gate a packet crosses costs signal quality (about
0.4 dB of power penalty per SOA in the prototype). So the number of gates
crossed matters.

**Queue.** Let N be the number of packets in the queue when a packet arrives,
and T the number of slots it stays. It crosses exactly **N + T + 1** gates:
N + 1 while climbing to its place, then one per slot. The end-to-end test
follows every packet through the gate monitors and checks this for every
delivered packet, under random traffic with 2 and 6 modules. In the two
sequences above that gives 3, 5, 3 and 1 gates for p1 to p4.

**Stack.** The simple count T + 1 holds only for a packet that is never
pushed. Each slot in which a packet moves up costs a second gate (B2U or U2U
in one module, then D2B in the next). In the stack sequence above, p1 crosses
D2B, B2U, D2B, B2D, U2D: five gates, one more than T + 1 = 4. The published
analysis gives 4 for it. The testbench expects 5, 2, 3, 1.

## What is and is not modelled

Modelled in synthesizable RTL:

- the routing logic;
- the switching function of the gates;
- the one-slot fiber delays;
- the cascade.

Not modelled, because they have no digital function beyond the one above:

- the SOAs' gain, drive current and switching time;
- the couplers;
- the low-speed receivers that tap each input to detect a packet. Here the
  word's valid flag takes their place.

The prototype's fiber lengths made the timing work with 102-ns slots: about
22 ns of decision time, 15 ns going up, 65 ns coming down and an 80-ns delay
loop. The model only assumes the outcome: up in the same slot, down and
around the loop in one slot.

Choices of this model, not of the original:

- The mode is a parameter (`MODE_FIFO` by default).
- The default chain has two modules, like the demonstrated prototype.
- There is a synchronous active-high reset that empties every delay line.
- The payload is 900 bits.
- A stack module above the root is built without the D2D gate, as in the
  original module drawings. The routing logic is still identical in every
  module.
- There are extension ports at the top (`up_out`, `up_in`, `rreq_out`), so
  that a buffer can be extended with another.
- There are monitor ports for every module's delay line (`buf_mon`), the
  read request into every module (`rreq_mon`) and all gate enables
  (`gate_mon`, which in the optical module drive the SOAs). `rreq_mon[0]` is
  the external request, `rreq_mon[1]` the request passed to the second
  module, and `rreq_out` the one leaving the top.

## RTL

| file | contents |
|------|----------|
| `rtl/obuf_pkg.sv` | `pkt_t` (valid, 7-bit label, payload), `gates_t`, `mode_e`, `gates_needed()` |
| `rtl/routing_logic.sv` | the two truth tables, combinational |
| `rtl/cross_connect.sv` | gated 3×3 cross-connect, `PRESENT` = gates built |
| `rtl/fdl.sv` | delay line of `DELAY_SLOTS` slots, reset to empty |
| `rtl/buffer_module.sv` | one module: routing logic + cross-connect + one-slot delay line, with assertions |
| `rtl/optical_packet_buffer.sv` | the top: `NUM_MODULES` modules and the descending fibers between them |

Top-level parameters: `MODE` (`MODE_FIFO` or `MODE_LIFO`, default FIFO) and
`NUM_MODULES` (default 2). Ports:

- `clk`, `rst`;
- `pkt_in`, `rreq_in` and `pkt_out` at the root;
- `up_out`, `up_in` and `rreq_out` at the top (tie `up_in` to
  `obuf_pkg::NO_PKT` when nothing is attached; see "Extending a buffer"
  below);
- the arrays `buf_mon`, `rreq_mon` and `gate_mon`.

`pkt_out`, `up_out`, `rreq_out` and the monitors are combinational in the
current slot's inputs. Sample them before the clock edge that ends the slot.

The longest combinational path runs from `pkt_in` and `rreq_in` through every
module to `up_out`. It grows linearly with `NUM_MODULES`, which is the
electronic counterpart of the optical chain's ripple from module to module.

### Extending a buffer

Adding capacity means adding modules at the top, and no module needs to be
reconfigured. To extend one buffer with another of the same mode, connect:

- the lower buffer's `up_out` to the upper buffer's `pkt_in`;
- the lower buffer's `rreq_out` to the upper buffer's `rreq_in`;
- the upper buffer's `pkt_out` to the lower buffer's `up_in`.

`up_in` passes through the same one-slot descending fiber as the links
inside a buffer. The pair then behaves exactly like one buffer with the
modules of both. `tb/obuf_cascade.sv` does this wiring. The upper buffer's
first module is built as a root: in a stack it keeps a D2D gate that it
never uses.

To change the packet format, edit `LABEL_W` and `PAYLOAD_W` in the package.
The buffer never looks inside a packet. To program another priority scheme,
add a mode and its table to `routing_logic` and its gate set to
`gates_needed()`.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog
if it hangs.

- `tb_obuf_pkg`: gate sets per module kind and the packet width.
- `tb_routing_logic`: all 16 input states in both modes against the tables
  above.
- `tb_cross_connect`: random packets and gate settings, including a
  cross-connect built without D2U and D2D.
- `tb_fdl`: one- and three-slot delays and reset.
- `tb_buffer_module`: a queue module and a stack module under random inputs.
  The reference is written per packet ("where does each packet go"), not per
  gate.
- `tb_optical_packet_buffer`: two- and six-module queues and stacks. The
  test:
  - replays the two sequences above, gate by gate;
  - runs 3000 slots of random traffic (light load, heavy load with overflow,
    drain) against a reference queue or stack;
  - checks the N + T + 1 gate count per queue packet;
  - counts every mechanism: store, hold, climb, read from the delay line,
    read of a returning packet, pass-through at the root, bounce from an
    upper module, push, return up, curtailed request, read of an empty
    buffer, overflow, and queue overflow with a read in the same slot.

  A mechanism of the mode that never occurs is a failure. The stimulus and
  checking are in `tb/obuf_env.sv`.
- `tb_obuf_cascade`: 2 + 2 and 3 + 1 modules chained through the extension
  ports, in both modes, checked by the same environment as one four-module
  buffer.
- `tb_obuf_load`: 32-module queue and stack under random writes (probability
  p) and read requests (q = 0.5) at loads p/q of 0.4, 0.6 and 0.8, for
  40 000 slots each. The slot-level birth-death chain of the buffer gives
  r = p(1−q) / (q(1−p)) and a mean stay of r / ((1−r) p) slots. The
  measured mean stay must be within 12 % of that. For the queue, the total
  number of gates crossed must equal the sum of N + T + 1 over all packets.
  Measured at load 0.8: mean stay 4.8 slots (queue) and 5.4 (stack), against
  5.0. The mean number of gates crossed was 7.7 (queue) and 7.5 (stack).
  This is the longest-running testbench, about a minute.
- `tb_optical_packet_buffer_full`: the top with all defaults (a two-module
  queue) under the same environment.

To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/obuf_pkg.sv tb/tb_optical_packet_buffer.sv --top-module tb_optical_packet_buffer
./obj_dir/Vtb_optical_packet_buffer
```

Replace the testbench name to run another one. The simulator has two states,
so all state that is read is reset or initialised.
