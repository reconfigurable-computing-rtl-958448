# A three-node CAN 2.0A network on one chip

This design puts three Controller Area Network (CAN) controllers, and the bus
that joins them, inside one piece of logic. A host computer talks to it over
a simple link made of flags and bytes. The host asks a node to send a message.
The node turns the message into a standard CAN 2.0A data frame and puts it on
the bus one bit at a time. The other nodes read the frame off the bus and hand
it back to the host.

The nodes do not run in parallel on a shared bit clock. A sequencer gives
each node a turn to write one bit and then a turn to read one bit. A node only
needs one bus bit of state between turns. Seen from the bus, the nodes behave
as CAN controllers running side by side. They arbitrate bit by bit without
destroying the winning frame, stuff and de-stuff bits, check the CRC-15 and
acknowledge frames.

## How one bus bit is made

The bus is one flip-flop (`can_bus_emu`) that acts as a wired AND: a dominant
0 from any node overrides a recessive 1. `can_phase_seq` builds every bus bit
from `2*NODES+2` clocks (8 clocks with three nodes):

| clock | action |
|---|---|
| 0 | `phase_clear`: the bus goes back to recessive 1 |
| 1 .. N | write slots: node *k* ANDs its bit into the bus |
| N+1 .. 2N | read slots: node *k* samples the bus |
| 2N+1 | `status_we`: mode, bit count, written and read bit of every node are captured |

Clock 0 only starts when nothing holds the sequencer. It waits while:

* the network has not been started, or has been ended by the host;
* a host message is coming in (`host_busy`);
* a node holds a received frame that the host has not yet taken.

In trace mode the sequencer also stops after every bus bit. It goes on by one
bit each time the host sends a message. Between two bus bits all nodes are
therefore in a consistent state. This is what the status record shows.

Because one node writes per clock, arbitration is resolved by the order of
the AND, not by timing. When the read slots come, the bus already holds the
AND of all written bits.

## A node: modes and the life of a frame

`can_node` is the data link layer of one controller. Each node is always in
one of four modes:

| mode | code | write slot | read slot |
|---|---|---|---|
| IDLE | 0 | recessive | watches for a start of frame: a 0 after at least 10 recessive bits. Once a built frame is pending, it becomes SEND if the bus has been recessive for 10 bits, and WAIT otherwise. |
| RECEIVE | 1 | dominant ACK in the ACK slot if the CRC matched, otherwise recessive | de-stuffs, stores and checks the frame |
| SEND | 2 | the next frame bit, or the stuff bit it owes | reads its own bit back and compares |
| WAIT | 3 | like RECEIVE while a frame is on the bus | has a frame pending: new, or after lost arbitration, an error or no ACK. Goes to SEND after 10 recessive bits. |

**Frame layout.** This is a standard data frame, with every field sent most
significant bit first:

| SOF | identifier | RTR | IDE | r0 | DLC | data | CRC | CRC delim. | ACK slot | ACK delim. | EOF + IFS |
|---|---|---|---|---|---|---|---|---|---|---|---|
| 0 | 11 | 0 | 0 | 0 | 4 | 0..64 | 15 | 1 | 1 | 1 | 10 × 1 |

A frame is 47 + 8·bytes bits long before stuffing: 47 bits with no data and
111 bits with 8 bytes. DLC values above 8 mean 8 bytes. The frame ends with
10 recessive bits of end-of-frame and interframe space. With the ACK
delimiter before them, that makes 11 recessive bits. So as soon as a frame
ends, nodes waiting for an idle bus may start in the next bit.

**Building.** On a request, `can_frame_builder` loads the fixed fields at
once. It then runs the CRC over SOF..data, one bit per clock, in a
`can_crc15`. That takes `19 + 8·bytes + 1` clocks, 20 to 84. The frame counts
as pending only after that. This happens outside the bus schedule, so a frame
is usually ready within a few bus bits.

**One shared bit counter.** Sender and receivers handle the bus in the same
way. In each read slot a node drops the bit if it is a stuff bit. A stuff bit
follows five equal bits from SOF to the end of the CRC sequence. Otherwise
the node stores the bit at position `pos` and feeds it to the receive CRC if
it lies before the CRC field. After the last DLC bit the node knows the frame
length. The sender uses this same counter to know where it is. When the
counter says a stuff bit is due, it writes the complement of the last bit.
Otherwise it writes `frame[pos]`. An assertion checks that the length the
sender reads from the bus equals the length of the frame it built.

**Arbitration.** A sender may read back a 0 where it wrote a 1 while inside
the identifier or the RTR bit. It has then lost arbitration. It becomes WAIT
and receives the rest of the frame like any receiver, including writing the
ACK. Its own frame stays pending. The lowest identifier wins, and it never
has to resend. The loser sends its frame once the bus has been idle for 10
bits.

**ACK and CRC.** In the write slot of the ACK slot, a receiver compares its
computed CRC with the 15 CRC bits it received. If they match, it writes a
dominant 0. The sender sees the 0 in its read-back and accepts it. At the end
of the frame the sender drops its pending frame and goes IDLE. If no node
acknowledged, the sender keeps the frame and retries from WAIT. A receiver
whose CRC did not match writes no ACK, raises `crc_err` and discards the frame.

**Errors.** A read-back mismatch outside arbitration and the ACK slot, or a
stuff bit with the wrong level, abandons the frame. The node then returns to
IDLE, or to WAIT if it has a frame to resend. No error or overload frames are
sent: a node that detects an error stays silent.

Each node reports one-clock event pulses (`node_evt_t` in `can_pkg`) for SOF
seen, stuff bit removed, arbitration lost, bit error, stuff error, CRC error,
ACK written, ACK missing, frame sent and frame received.

## The host link

`can_host_if` is the node side of the host link. The link has two flags and
two byte channels:

| signal | direction | meaning |
|---|---|---|
| `gpo` | host → design | host has a message |
| `gpi` | design → host | design has a message |
| `ctrl_valid/ctrl_data/ctrl_ready` | host → design | byte channel |
| `stat_valid/stat_data/stat_ready` | design → host | byte channel |

A byte moves in the clock where valid and ready are both high. Either side
may wait as long as it likes.

**Host to design.** The host raises `gpo` and sends the message type. For
DATA and STATUSREQ it then sends an item count and the items. The design
echoes every byte on the status channel as its acknowledgement. The host
then lowers `gpo`. Items land in the 12-byte `can_msg_buffer`:

| byte | 0 | 1 | 2 | 3 .. 10 | 11 |
|---|---|---|---|---|---|
| content | node number | identifier (low 8 bits) | data length | data 0 .. 7 | spare |

| type | code | effect |
|---|---|---|
| TEST | 0 | none |
| DATA | 1 | node *byte 0* sends identifier `{3'b000, byte 1}`, DLC byte 2, data bytes 3.. |
| TRACEON | 2 | stop after every bus bit |
| TRACEOFF | 3 | run freely |
| ENDPRG | 4 | stop the network until reset |
| STATUSREQ | 5 | none; the status is read through the status port |

Any message also starts the network the first time, and in trace mode lets
one bus bit run. A DATA request is dropped, with a `req_dropped` pulse, in
two cases: the node is still busy with an earlier frame, or the node does
not exist.

**Design to host.** A node may hold a received frame while the host is not
sending. The design then loads that frame into the buffer and raises `gpi`.
It sends type DATA, then the count 3 + bytes, then the items: node, identifier
bits 7:0, DLC and the data. It then waits for one "OK" byte from the host.
When several nodes hold a frame, node 0 goes first. Only the OK releases the
node's frame, and until then the bus is held. A host model must therefore
serve `gpi` before it raises `gpo`. If `gpi` rises right after the host
raised `gpo`, the host should take the design's message first.

Identifiers on the host side are 8 bits wide. On the way in, the top three
bits of the 11-bit identifier are 0. On the way out, they are dropped.

**Status record.** `can_status_buffer` holds 4 bytes per node: mode, bit
position, last written bit and last read bit. Node *k* is at bytes 4k..4k+3.
It is refreshed after every bus bit. The host reads it at any time through
`bank_addr`/`bank_data`, as from a memory bank, without stopping the nodes.

## Top level and parameters

`can_network_top` wires `NODES` nodes (default 3), the bus, the sequencer,
the host link and the status record together. Its ports are the host link,
the status read port, and for observation these outputs: `bus`, `node_mode`,
`node_evt`, `bit_cycles` (bus bits run), `halted`, `trace` and `req_dropped`.

| parameter | default | where |
|---|---|---|
| `NODES` | 3 | top, sequencer, bus, host link, status record |
| `STUFF_LIMIT` | 5 | node: equal bits before a stuff bit |
| `IDLE_THRESHOLD` | 10 | node: recessive bits that mean "bus free" and precede a SOF |
| `BUF_WORDS` / `WORDS` | 12 | message buffer |

Shared constants, the frame field positions, the CRC polynomial (4599h), the
message type codes, the mode enum and the event struct are in `rtl/can_pkg.sv`.
The synthesized top is about 1,600 word-level cells and 1,400 flip-flops. Most
of these are the 111-bit transmit and receive frame registers of each node.

## Timing summary

* One bus bit: 8 clocks with 3 nodes, when nothing holds the sequencer.
* Frame build: 20 to 84 clocks after the request.
* A frame takes (47 + 8·bytes + stuff bits) bus bits. A node with a pending
  frame starts one bus bit after the 10th recessive bit.
* Returning a received frame to the host stops the bus for as long as the
  host takes to read it.

## Choices made in this design

These points are not fixed by the CAN protocol description this design
follows, or they depart from a literal reading of it:

* Nodes take one clock per slot. The bus is a register, not a wire.
* A bus bit always takes the same number of clocks. In a software-style
  version of this scheme, the bit period would vary with the work each node
  does in its turn.
* The run of recessive bits that frees the bus is counted all the time, not
  from the moment a frame is requested. So a node on an already idle bus
  starts its frame in the next bit.
* A node that lost arbitration acknowledges the frame it is receiving. A
  stricter reading would have WAIT nodes stay silent. But then a frame whose
  every other node lost arbitration would never be acknowledged.
* The sender tracks stuffing from the bus it reads back. It shares the
  de-stuffing counter with the receive path instead of keeping its own.
* The stuffed region is SOF to the end of the CRC sequence, as in CAN. The
  recessive tail is never stuffed.
* After the frame's ACK delimiter come 10 recessive bits of end-of-frame and
  interframe space, not 7 + 3.
* Error and overload frames are not generated. Errors abandon the frame
  silently. Retries follow an abandoned frame and a missing ACK.
* The host sequence follows the sender's byte order: type, count, items, each
  echoed. Type codes 2, 3 and 4 are this design's.
* The sequencer holds at the start of a bus bit while a received frame waits
  for the host. It does not stop in the middle of the read phase.
* Requests to a busy node are dropped rather than queued.
* Reset is asynchronous and active low and clears every register.
* The host application, the FPGA board and its PCI link and memory banks are
  outside this RTL. The board's flag pins, byte registers and memory bank
  appear as plain ports of the top.

## Files

| file | content |
|---|---|
| `rtl/can_pkg.sv` | constants, frame layout helpers, mode enum, event struct |
| `rtl/can_crc15.sv` | serial CRC-15 |
| `rtl/can_frame_builder.sv` | frame assembly with CRC |
| `rtl/can_node.sv` | one controller node |
| `rtl/can_bus_emu.sv` | wired-AND bus |
| `rtl/can_phase_seq.sv` | write/read/status slot sequencer |
| `rtl/can_msg_buffer.sv` | 12-byte message buffer |
| `rtl/can_host_if.sv` | host flag/byte link |
| `rtl/can_status_buffer.sv` | per-node status record |
| `rtl/can_network_top.sv` | top level |
| `tb/can_ref_pkg.sv` | reference frame, CRC and stuffing model for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends itself. A
watchdog counts a failure if a testbench hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/can_pkg.sv tb/can_ref_pkg.sv rtl/can_*.sv tb/tb_can_network_top.sv \
  --top-module tb_can_network_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name to run another one. `tb_can_network_top` runs the
top at its default parameters and takes well under a second. Here is what
it covers:

* three-way and two-way arbitration, with the losers retrying;
* the frame "FIRST" (identifier 100) compared bit for bit with the reference
  bus stream, and returned by both other nodes;
* stuffing on all-zero data;
* trace-mode stepping and status read-back;
* the 8-clock bus bit;
* a dropped request;
* ENDPRG.

It counts every mechanism and fails if one never happened. `tb_can_node`
covers the error paths, which cannot happen on a clean shared bus:

* CRC error, with no ACK;
* missing ACK, followed by a retry;
* stuff error.

Lint with `verilator --lint-only -Wall -Irtl rtl/can_pkg.sv
rtl/can_network_top.sv`. The other modules are found through `-Irtl`. Two
warnings remain. One is an unused package constant, the TEST type code,
which needs no action. The other is `rst_n` being used both as an
asynchronous reset and in the assertion's `disable iff`.
