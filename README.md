# RFTSAP: a reconfigurable array of 8-bit processor slices

A large processor has poor yield because its area is large: one defect anywhere
ruins the whole die. This design builds the large processor from small
processor *slices* instead. For example, four 8-bit slices together act as one
32-bit processor. Small slices yield much better, and the few faulty ones can
be left out.

The difficulty is the wiring. Any group of working slices must be joined
together, whichever slices happen to be faulty, and the wiring must stay small
or it eats the yield gain. This design puts the slices in a mesh. Each slice
sits in a node with a **programmable I/O unit (PIOU)**. The PIOU has four
ports (up, right, left, down) and six switches, one for each pair of ports. To
skip a faulty slice, one switch in its PIOU is closed. That joins two of the
node's links straight through, so the neighbours on both sides talk directly.
A group of slices is led by one of them, which broadcasts commands. Every
group member picks up the broadcast as it passes through that member's own
closed switch.

The RTL covers the array, the nodes, the PIOU and its parts, and the local
memory. It does not cover the processing element (PE) of each node, which is
an ordinary 8-bit microprocessor. The PE buses are brought out as ports.

## Array and node

`rftsap_array` is a `ROWS x COLS` mesh of `rftsap_node`s. The default is
4 x 4, so each row can form one 32-bit processor. Port numbering is used
throughout:

| index | port | neighbour of node (i,j) |
|-------|------|-------------------------|
| 0 | U | (i-1, j), its D port |
| 1 | R | (i, j+1), its L port |
| 2 | L | (i, j-1), its R port |
| 3 | D | (i+1, j), its U port |

Links on the edge of the array come out as `north_*`/`south_*` (one per
column) and `west_*`/`east_*` (one per row), so a host can reach the array.
Tie an unused edge to `'0` (no message, never full). Then anything sent off
that edge is taken and dropped.

A node (`rftsap_node`) is a PIOU (`piou`) plus a local memory
(`local_memory`, 256 x 8 bits, synchronous, one-cycle read). The PE uses the
memory for programs and for switch settings. Each PE-side signal of the array
is a `[ROWS][COLS]` array, indexed `[i][j]`.

## The programmable I/O unit

### Links and messages

A link carries a `link_msg_t` (`rftsap_pkg`):

| field | width | meaning |
|-------|-------|---------|
| `valid` | 1 | a message is offered |
| `kind` | 2 | `MSG_DATA` (point to point), `MSG_BCAST` (global operation), `MSG_CONFIG` (remote switch setting) |
| `data` | 8 | one slice-width word |

Each link also has a `full` wire going the other way. A message moves on a
clock edge where `valid` is high and the receiver's `full` is low. Senders
must hold a message until it is taken. A PIOU port's `full` and its outgoing
message come straight from flip-flops. Only closed switches add combinational
paths.

### Ports (`piou_port`)

Each port has a one-entry transmit buffer and a one-entry receive buffer. The
PE selects ports with the one-hot `pe_port_en`, and `pe_wr`/`pe_rd` act on the
selected port. A word written at edge N is on the link right after N. If the
receiver is free, it is in the receiver's buffer at edge N+1.
`pe_tx_ready[p]` means a write will be taken. `pe_rx_ready[p]` means
`pe_rdata`/`pe_rkind` hold a received word, and `pe_rd` frees it.

### Switches (`switch_matrix`)

| switch | `rr_closed` bit | joins | group / decoder |
|--------|-----------------|-------|-----------------|
| S1 | 0 | U-R | 1 |
| S2 | 1 | U-L | 1 |
| S3 | 2 | U-D | 1 |
| S4 | 3 | R-L | 2 |
| S5 | 4 | R-D | 2 |
| S6 | 5 | L-D | 2 |

Closing a switch connects its two links **combinationally**, in both
directions. A message entering one port leaves the other in the same cycle.
The far side's `full` comes back in the same cycle too. A chain of bypassed
nodes therefore behaves like one long wire: a message crosses any number of
them on the edge it is handed over. The two ports of a closed switch are cut
off from their own buffers. Their transmit side sees `full`, and their receive
side sees nothing.

Two closed switches may not share a port. Closing S3 and S4 together, for
example, is allowed: it bypasses the node both vertically and horizontally.
The reconfiguration register refuses settings that break this rule, and an
assertion in `switch_matrix` checks it.

### Command decoders (`command_decoder`)

Each group of switches has one decoder. The decoder is active while a switch
of its group is closed, and it watches the messages crossing that switch in
both directions. A `MSG_BCAST` message is copied into a one-word buffer
(`pe_bcast_valid[g]`, `pe_bcast_data[g]`) as the message goes by, and the PE
frees the buffer with `pe_bcast_ack[g]`. While the buffer is still occupied,
the decoder holds back the next broadcast: it removes `valid` on the far side
and shows `full` to the sender. This way no group member misses an
instruction. Data and configuration messages are never held or copied. If
broadcasts arrive in both directions in the same cycle, the one entering at
the lower-numbered port goes first.

### SR, RR and remote control

* **SR** (`status_register`) is `SR_LOCAL` after reset. It goes to
  `SR_REMOTE` when the node's `pe_faulty` input is raised, for example by a
  wafer test or a self-test. It stays remote until the next reset.
* **RR** (`reconfig_register`) holds the six switch bits and resets to all
  open. In `SR_LOCAL`, the PE writes it with `pe_ctrl_wr`, taking the value
  from `pe_wdata[5:0]`. In `SR_REMOTE`, the PE bus is ignored, and a
  neighbour controls the unit instead. It does this by sending a
  `MSG_CONFIG` message into any open port, and the low six bits of that
  message load RR. A faulty node's ports take and drop every other message,
  so they never block their neighbours. `rr_reject` shows that the last write
  was refused.

## Example: forming a 32-bit module around a fault

The end-to-end test (`tb/tb_rftsap_array.sv`) does the following, with node
(1,1) faulty:

1. (1,0) sends `MSG_CONFIG 0x08` out of its R port. Node (1,1) is remote, so
   it closes S4 and is bypassed.
2. (1,2) reads its setting from local memory and writes it to RR (S4).
   (1,3) writes S6 (L-D), so the chain turns down to (2,3).
3. (1,0) writes a `MSG_BCAST` word to its R port. One edge later, the word
   has crossed (1,1), (1,2) and (1,3). Both members' decoders hold a copy, and
   (2,3) has it in its U buffer.
4. Replies from (2,3) travel back the same way to (1,0) as `MSG_DATA`.

The four slices (1,0), (1,2), (1,3) and (2,3) now form one 32-bit module. How
the slices then split the 32-bit work among themselves (carries, shared
instruction stream) is PE software and PE design. It is not part of this RTL.

## Choices made in this RTL

The architecture fixes the node contents, the four ports, SR and RR, six
switches in the groups {S1,S2,S3} and {S4,S5,S6}, one decoder per group, the
same-cycle bypass, and broadcast as a global operation. The following are
this design's own choices:

* which port pair each switch joins (the table above);
* the message format, the valid/full handshake and the one-entry buffers;
* splitting a port's Ready into `rx_ready` and `tx_ready`;
* remote control by `MSG_CONFIG` messages, and a sticky SR set by
  `pe_faulty`;
* allowing several switches closed at once if they share no port;
* the decoder's one-word buffer, its hold-back rule and its priority;
* array size (4 x 4), memory size (256 x 8) and the edge ports;
* asynchronous active-low reset `rst_n` on all control state (the memory
  array has none).

## Combinational loops

Closed switches pass messages and `full` through without a register. In the
netlist, that makes paths around every square of four nodes. Verilator
reports them as `UNOPTFLAT`, and synthesis tools report logic loops. A loop is
closed only if the switch settings actually route a link round a ring back to
itself, and a configuration must not do that. Timing analysis needs the
bypass paths cut at the switches, or constrained per configuration.

## Why slicing pays

Yield falls roughly exponentially with area, so a module of a quarter of the
area yields far better than the whole. Slicing costs area for the
interconnect between slices. Model that area as a part proportional to the
slice area, plus a constant part per slice. The gain factor is then the
number of working slice groups per wafer divided by the number of working
whole processors. It peaks at a moderate granularity (around 10 slices per
module for the cases studied), and it stays useful only while the
interconnect overhead is under about 30%. With only one link per direction
between neighbours, this array is designed to stay in that range. Gain factors
of about 2 to 4 (2 to 3 in more conservative figures) are expected against an
unsliced processor of about 1 cm².

## Files and simulation

`rtl/` contains one unit per file: `rftsap_pkg` (types, port and switch
tables), `piou_port`, `switch_matrix`, `command_decoder`, `status_register`,
`reconfig_register`, `piou`, `local_memory`, `rftsap_node`, `rftsap_array`
(top). `tb/` has a self-checking bench `tb_<module>` for each module. Each bench
prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_rftsap_array` runs the full 4 x 4 array at its default parameters.
`tb_fault_maps` also uses the full array. It draws 100 random fault maps (each
PE faulty with probability 1/4) and builds one group per row. Working members
close S4 themselves. The leader bypasses each faulty node in turn with CONFIG
messages, each one crossing the nodes already bypassed. The leader then
broadcasts words, and every member and the end node must get all of them.

```
verilator --binary --timing --assert -Wno-UNOPTFLAT -Irtl -y rtl rtl/rftsap_pkg.sv \
    tb/tb_rftsap_array.sv --top-module tb_rftsap_array -Mdir obj
./obj/Vtb_rftsap_array
```

Any other bench works the same way: replace the bench file and the top-module
name. Without `-Wno-UNOPTFLAT`, Verilator stops on the loop warning
described above for the benches that include the whole array (add
`-Wno-fatal` to see it and go on). The array
bench builds in about 20 s and runs in well under a second.
