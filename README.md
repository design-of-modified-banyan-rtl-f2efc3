# Modified Banyan switch, 8 x 8, bit-serial

A Banyan network connects N inputs to N outputs with only (N/2)·log2 N small
2x2 switching elements. Each element steers a packet by one bit of the
packet's destination address, so the packet finds its own way through the
network. The weakness of a Banyan is contention. Two packets can collide inside
the network, and two packets for the same output always collide at its end.

This switch changes a plain 8x8 Banyan in two ways:

* **An extra first column of elements.** Every input then has two paths to
  every output. A *path bit* in the packet header picks one of the two.
* **A one-packet buffer per output port.** When two packets reach the same
  output in one slot, one leaves at once. The other is stored and leaves in
  the next slot.

No packet is lost to contention. A packet that loses an arbitration stays queued
at its input and is offered again in the next slot. The retry takes the other
path.

## Packets and slots

Data moves one bit per clock on each port. Packets have a fixed length
`PKT_LEN = 5 + DATA_W` clocks, 13 by default. The switch works in *slots* of that
length. The `shcp` input is a one-clock strobe on the first clock of a slot.
Give it once and the switch keeps counting slots on its own. Giving it again
every `PKT_LEN` clocks is allowed. An assertion flags an `shcp` that does not
fall on a slot boundary. All eight inputs must be aligned to the slots.

Packet bits, in the order they are sent:

| slot clock | bit | meaning |
|---|---|---|
| 0 | activity | 1 = a packet is present; 0 = idle slot |
| 1 | path | which of the two paths to use (output of the first column) |
| 2..4 | d2 d1 d0 | destination output, MSB first |
| 5.. | data | `DATA_W` data bits, MSB first |

The five-bit header matches the packet layout this design follows. It also
follows that layout in sending the activity bit first and the address MSB first.
The path bit's position in the header and the data length are this
implementation's choices.

## Data path

```
 din[0..3] --> input_controller (IC1) --+
                                        +--> banyan_switch --> output_controller --> dout[0..7]
 din[4..7] --> input_controller (IC2) --+     3 columns        last column +
                                                               8 one-packet buffers
                 ^                                                  |
                 +------------------- grant (per input) ------------+
```

**Input controllers** (`input_controller`, `ic_port`). Each input has a
serial receiver and a FIFO of whole packets (`DEPTH` = 4). This FIFO is the
"packet register". Each input also has a header register. At every slot
boundary the head packet's header is copied into the header register. The header
register holds the routing controls steady for the whole next slot. Meanwhile a
shift register sends the packet into the network bit by bit. The head packet is
removed only when the switch grants it. A packet that arrives at a full FIFO is
dropped and flagged on `overflow`.

**Switch network** (`banyan_switch`, `banyan_se`). There are three columns of
four 2x2 elements. Each element has data inputs In0/In1 and control bits H0/H1.
A packet with control bit 0 leaves on the upper output. A packet with control
bit 1 leaves on the lower output. Column 0 pairs inputs 2k and 2k+1 and steers
by the path bit. Columns 1 and 2 steer by d2 and d1. The columns are wired as an
omega network, with a perfect shuffle (rotate the link number left by one bit)
before every column after the first. A packet from input `a2 a1 a0` with path
bit `p` passes through these links:

| after | link |
|---|---|
| column 0 | a2 a1 p |
| column 1 | a1 p d2 |
| column 2 | p d2 d1 |
| into the output controller | d2 d1 p |

**Output controller** (`output_controller`, `oc_cell`, `oc_buffer`). This is the
fourth column. Each `oc_cell` takes link pair 2k/2k+1. It delivers to output
ports 2k and 2k+1, steering by d0. Each output port has an `oc_buffer`, a
`PKT_LEN`-bit shift register that replays a stored packet one slot later.

## Contention

This is where the design does its real work. Every decision is made once per
slot from the header registers. Those decisions are combinational, so the serial
bits of that slot follow the chosen route with no pipeline delay.

1. **First column: never.** The input controller rewrites the path bits of each
   input pair. The upper input keeps its preferred path bit. When the upper
   input is active, the lower input gets the opposite bit. The two packets of a
   pair therefore always leave their first-column element on different outputs.
   The rewritten bit is also what goes out on the wire.
2. **Banyan columns: arbitration.** Two packets can ask for the same output of an
   element. The winner is the upper input in even slots and the lower input in
   odd slots (`prio` toggles each slot). The loser disappears from the network
   for this slot.
3. **Output ports: buffering.** For each output port:
   * Buffer empty, one packet for the port: it goes straight out.
   * Buffer empty, two packets for the port: one goes out and the other is stored.
   * Buffer full: the stored, older packet goes out. One new packet is stored in
     its place. A second new packet is refused.

Each packet taken at the output controller, whether sent or stored, produces a
`grant` back to its input, found by the source number that travels with it. An
input without a grant keeps its packet. In the next slot it offers the packet
again with its preferred path bit inverted, so the retry uses the other path
through columns 1 and 2.

A packet from one input to one output can never overtake an earlier one. The
input FIFO keeps them in order, and each output buffer is emptied before
anything newer passes.

## Timing

* Routing controls change only at slot boundaries. Within a slot the network is
  combinational from the input controllers' registers to `dout`.
* With no contention, a packet received in slot n appears on its output port in
  slot n+1, at the same clock position: `PKT_LEN` clocks from input bit to
  output bit. A stored packet leaves one slot later. A refused or blocked packet
  leaves at least one slot later.
* The output stream is the packet as it entered, except for the path bit, which
  shows the path actually taken. An idle output sends zeros.
* `rst_n` is an asynchronous, active-low reset. It empties the FIFOs and
  buffers.

## Modules

| file | role |
|---|---|
| `rtl/mbs_pkg.sv` | port count, header width, `link_t` (one network link: valid, source, path, destination, serial bit) |
| `rtl/mabasw.sv` | top: slot framing, arbitration priority, grant return, the three blocks below |
| `rtl/input_controller.sv` | four inputs in two pairs, path-bit rewriting |
| `rtl/ic_port.sv` | one input: receiver, packet FIFO, header register, transmitter, retry |
| `rtl/banyan_switch.sv` | three columns of elements, omega wiring |
| `rtl/banyan_se.sv` | 2x2 element with H0/H1 control and clash arbitration |
| `rtl/output_controller.sv` | last column, four `oc_cell` |
| `rtl/oc_cell.sv` | 2x2 output element with two port buffers |
| `rtl/oc_buffer.sv` | one-packet serial buffer |

Top-level parameters: `DATA_W` (8), `DEPTH` (4), and the derived `PKT_LEN`. The
eight ports are fixed by `N_PORTS` in the package. The wiring assumes 3-bit
addresses throughout.

Status outputs, one bit per port, each valid for one clock:

| output | valid in | means |
|---|---|---|
| `overflow` | first clock of the next slot | a packet was dropped at a full input FIFO |
| `retry` | first clock of the next slot | an offered packet was refused and kept |
| `stored` | the whole slot | a packet is entering that output's buffer |
| `refused` | the whole slot | a packet was refused at that output |

## Simulation

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mbs_pkg.sv rtl/mabasw.sv \
          tb/tb_mabasw.sv --top-module tb_mabasw
./obj_dir/Vtb_mabasw
```

| testbench | what it checks |
|---|---|
| `tb_banyan_se` | all 128 combinations of activity, control, data and priority |
| `tb_banyan_switch` | 3000 random loads against a closed-form link model of the omega network, clashes included |
| `tb_oc_buffer`, `tb_oc_cell`, `tb_output_controller` | bit-exact outputs and accept/store/refuse flags against a slot-level model of the buffers |
| `tb_ic_port`, `tb_input_controller` | FIFO order, overflow, retry with path inversion, path rewriting of pairs, serial output bits |
| `tb_mabasw` | end to end at default parameters (see below) |
| `tb_mabasw_throughput` | saturation throughput |

`tb_mabasw` runs the whole switch at its default parameters through five phases:

1. Single-packet latency.
2. Two inputs sending to one output in the same slot.
3. 400 slots of random traffic at load 0.5.
4. 300 slots at full load.
5. A drain.

A scoreboard checks that every packet reaches its destination intact and in
order. It also checks that every packet not dropped for a full FIFO is delivered
exactly once. The test fails if any mechanism never occurs: output buffering,
refusal, retry, FIFO overflow, pair path rewriting, or either path bit.

All of these testbenches run in well under a second.

## Performance

`tb_mabasw_throughput` offers a packet on every input in every slot, with
uniformly random destinations. It measures **0.571 packets per output per slot**
over 2000 slots.

For comparison, the analysis of input-queued switches with FIFO queues gives
these limits for uniform traffic:

| case | limit |
|---|---|
| large switch | 0.586 |
| N = 8, one packet per output per slot | 0.62 |
| N = 8, two packets per output per slot | 0.72 |

The design this RTL follows claims the 0.72 figure for its switch. This
implementation stays below it. Internal blocking in the two Banyan columns
costs throughput that the output buffers cannot recover.

## Departures and open points

* **Network wiring.** The Banyan columns are wired as an omega network, chosen
  so that self-routing MSB first works from every input. The switch this design
  follows draws four columns with the same element arrangement, but its exact
  crossings between columns are not reproduced.
* **Internal blocking.** The source design calls its network nonblocking. This
  network is not: columns 1 and 2 can block. Blocked packets are retried rather
  than lost.
* **This implementation's own choices.** The following are not specified by
  the source design:
  * the arbitration rule;
  * the path-bit rewriting rule;
  * retrying on the other path;
  * FIFO depth and the drop-on-full policy;
  * data length;
  * slot framing;
  * the reset;
  * the status outputs.
* **Per-input header inputs.** The source design's symbol for the switch has
  eight per-input header inputs. They are not implemented, because their use is
  not defined. Headers travel in-band on the serial inputs instead.
* **Test environment.** The test setup around the original switch (host
  computers and a base station) is not part of this RTL.
