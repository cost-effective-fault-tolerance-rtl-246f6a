# Fault-tolerant Chaos router node

A Chaos router is a non-minimal adaptive packet router for two-dimensional meshes
and tori. It is fast because it avoids deadlock by randomisation rather than by
restricting routes. A packet cuts through to a profitable output when one is free.
When none is free, it waits in a small central multiqueue, and it is derouted
at random when the multiqueue fills.

This RTL adds fault tolerance to such a router at low cost. Nothing is
duplicated. Instead, a few cheap checks sit at places where errors must show up,
and one extra wire per link forms a broadcast network that keeps every router in
step. When any node sees an error, every router goes through the same sequence:

1. empty the network;
2. drop what cannot be delivered;
3. optionally run diagnostics;
4. resume with dead links masked out of the routing decision.

The network interface adds end-to-end checks that the routers cannot make:
- a checksum over the packet body
- a destination check
- lost, late and duplicate packet detection for multipacket messages

The code covers the fault-tolerance hardware of one node (`ft_chaos_node`). The
basic router datapath (input/output frames, crossbar, multiqueue, channel
arbitration) and the processing node's software are outside it. Their signals
are ports of the top module.

## Blocks

| Block | Module | Role |
|---|---|---|
| Shared types | `ft_pkg` | channel numbering, header flit struct, state enum, error flag indices |
| Header parity | `hdr_parity` | even parity of the first header flit, per input frame, 4-level XOR tree |
| Header update | `hdr_update` | one-hop displacement update and parity regeneration per output frame |
| Routing decision | `route_decision` | profitable ∧ functional list, No Routeback, fast deroute, local delivery |
| Configuration register | `config_reg` | 5 link-usable bits + 4 neighbour-alive bits, writable only at start-up or in diagnostics |
| Flit counter | `flit_counter` | ends a reception that runs past 20 flits |
| Output frame timeout | `out_timeout` | flags an output frame that waits too long for its channel |
| Channel protocol checker | `chan_protocol_checker` | detects control sequences no fault-free channel produces |
| EBN node | `ebn_node` | one-wire broadcast: latch five inputs, re-drive all outputs |
| Fault-management controller | `fm_controller` | the network-wide state machine |
| Drain timeout | `drain_timeout` | 20-bit programmable bound on the system drain |
| Drop logic | `drop_logic` | two-phase removal of undeliverable packets |
| Error report | `err_report` | sticky error flags for the processing node |
| Checksum | `ni_checksum` | 32-bit sum over the static flits, generated and checked |
| Delivery check | `ni_rx_check` | destination check, header fields for the tracker |
| Message tracker | `ni_msg_tracker` | per-message arrival bitmap and watchdog |
| Node | `ft_chaos_node` | all of the above wired together |

## Packet format

A packet has at most 20 flits of 16 bits.

| Flit | Contents |
|---|---|
| 0 (dynamic) | `[15]` parity, `[14]` reserved, `[13:7]` dx, `[6:0]` dy |
| 1 | `[15:6]` destination node, `[5:0]` packet sequence number |
| 2 | `[15:6]` source node, `[5:2]` message tag, `[1]` multipacket, `[0]` reserved |
| 3 … n-3 | payload (up to 15 flits) |
| n-2, n-1 | checksum, high half then low half |

The routers read only flit 0:
- dx and dy are signed hop counts still to travel.
- The X+ direction means dx > 0.
- Each hop moves the corresponding count one step towards zero (`hdr_update`).
- The parity bit makes the XOR of all 16 bits zero. It is regenerated on every
  update.

All other flits are static and protected end to end by the checksum.

## Error detection in the router

All checks run every cycle and are cheap enough to sit beside the existing
datapath.

- **Header parity** (`hdr_parity`):
  - A bad header cannot be routed reliably, so `route_decision` delivers it at
    once to the local processing node.
  - It also raises `mq_inhibit`, so the packet cannot enter the multiqueue and
    be derouted elsewhere while waiting.
  - Only bad-parity packets are held out of the multiqueue, so the common case is
    not slowed down.
- **Packet length** (`flit_counter`):
  - The end of a packet is marked only by EOM.
  - A 21st flit without EOM aborts the reception and flags an error.
  - Later flits are discarded until an EOM arrives.
- **Channel context** (`chan_protocol_checker`):
  - The non-owner of a channel may not drop its "want" or "input frame free"
    signal unless a transfer happened on the channel.
  - The owner may not start a packet into a router with no free input frame.
  - Error codes: 1 = want withdrawn, 2 = free frame withdrawn, 3 = start into a
    busy frame.
- **Output frame timeout** (`out_timeout`):
  - The channel rules bound how long an output frame can wait for ownership.
  - A counter per output frame flags an error when the wait reaches a
    programmable limit (reset value 255).

The router does not act on these errors itself. They set sticky flags
(`err_report`) that the processing node reads and clears. The processing node
then decides whether to start the network-wide procedure by asserting its EBN
wire.

## The Express Broadcast Network and the fault-management sequence

This is the part that needs the most care.

### One wire, two primitives

Each router has one output wire to each neighbour and one to its processing node,
and the same set of inputs. `ebn_node` registers the five inputs and drives all
five outputs from one register. A hop costs two cycles: one across the wire and
one through the node.

The wire carries only "asserted / not asserted". Two uses are built on it:

- **Eureka:** anyone may assert it, and everyone learns that someone did.
- **Barrier:** everyone asserts it until a condition holds for them; when nobody
  asserts it, the condition holds everywhere.

### Phase delay and windows

A broadcast reaches routers at different times. The routers therefore run the
same state sequence, each shifted by its distance from whoever started it. Let
the *Network Delay* (ND) be the worst-case broadcast time across the network.

Any choice made by looking at the wire is taken at the end of a window of
2 × ND:
- one ND for the most-delayed router to reach the window;
- one ND for its assertion to travel back to the most-advanced router.

`NET_DELAY2 = 160` cycles is the 8-bit delay counter of the original cost
analysis: 2 × 5 × 16 for a 1024-node system. A 32 × 32 torus has diameter 32,
which at 2 cycles per hop needs 2 × 64 = 128.

### States (`fm_controller`, `ft_pkg::fm_state_t`)

| State | Entered | EBN | Leaves |
|---|---|---|---|
| NORMAL | reset, NORM_HOLD | listen; re-drive what is heard | on any assertion → ERR_PROP (untimed) |
| ERR_PROP | eureka heard | off | after 6 cycles → DRAIN |
| DRAIN | ERR_PROP, NET_CLEAR | assert if a header is present, or if heard, until the window ends | after 160: asserted → NET_CLEAR, quiet → DECISION; drain timeout → DROP |
| NET_CLEAR | DRAIN | off | after 4 cycles → DRAIN; drain timeout → DROP |
| DROP | drain timeout | off | after 300 cycles → DECISION |
| DECISION | DRAIN, DROP | listen; assert if heard or if the processing node wants diagnostics | after 160: asserted → DIAG, quiet → NORM_HOLD |
| DIAG | DECISION | off | after 4000 cycles → NORM_HOLD |
| NORM_HOLD | DIAG, DECISION | off | after 4 cycles → NORMAL |

Points to note:

- **The barrier assertion is sticky.** A router that has a header present at any
  moment of the DRAIN window keeps asserting to the end of the window. It also
  re-drives and remembers what it hears. A packet that leaves a router just
  after it was seen therefore still holds every router in the loop.
- **NET_CLEAR lasts two hop delays.** This is long enough for a trailing
  neighbour to stop asserting the previous round's barrier. Otherwise that
  stale assertion would be mistaken for the next round's.
- **ERR_PROP and NORM_HOLD** keep the wire quiet, so that any later traffic
  trails the wavefront that started the round.
- **Packet injection** is stopped by the processing node when it sees the
  eureka on its EBN input. The router does not have to do it.

### Example

The end-to-end testbench uses a 3 × 3 mesh with the link between nodes 7 and 8
broken. The first eureka comes from node 8's processor:
- Node 8 enters ERR_PROP first.
- Every other node follows exactly 2 cycles per hop of its shortest working
  path. Node 7 is 3 hops away, through 4.
- All DRAIN windows end within 8 cycles of each other. This is within the
  160-cycle window, so all nodes agree on every decision.

### Drain timeout and dropping (`drain_timeout`, `drop_logic`)

A packet for an unreachable node would keep the barrier asserted forever.
`drain_timeout` bounds the drain:
- It is cleared in ERR_PROP and counts during DRAIN and NET_CLEAR.
- Its limit is programmable and resets to 307,200 cycles. This is the worst
  case: 1024 nodes × 15 full buffers × 20 flits all bound for one node.

After expiry, with limit L, the router enters DROP L + 1 cycles after entering
DRAIN. DROP has two phases:

1. **Force eject** (299 cycles). `force_eject` makes every routing decision
   "deliver here", the same path a parity error takes. Every packet that can
   move leaves the network through the nearest processing node.
2. **Clear** (1 cycle). The multiqueue scoreboard entries and output-frame valid
   bits that still hold packets are cleared (`mq_clr`, `of_clr`). The packet
   data is left untouched. The number cleared goes to the processing node
   (`dropped`) and sets the drop error flag.

300 cycles is enough for a router with 15 full 20-flit buffers to empty one flit
per cycle.

## Routing around dead components

After diagnostics, each processing node writes its configuration register
(`config_reg`):
- bits `[4:0]`: link usable for X+, X-, Y+, Y-, processor;
- bits `[8:5]`: neighbour alive.

Writes are accepted only while `pn_init` is high (system start-up, when unconnected
mesh edges are marked unusable) or in DIAG, when the network is empty. A write at
any other time is refused and flagged.

For each input frame, `route_decision` builds the candidate output list. The
basic router then picks from it as before.

1. **Profitable:** the directions that reduce |dx| or |dy|.
2. **Functional:** AND with the link mask.
3. **No Routeback:** remove the link the packet arrived on, unless it is the only
   functional link. A derouted packet is thus not sent straight back, which
   helps it slide along a line of dead links.
4. **Fast deroute:** if the list is now empty, send the functional mask (with No
   Routeback) instead of leaving the packet to wait in the multiqueue for a
   random deroute. `fast_deroute` marks this case. The processing-node link is
   never in a fast-deroute list.
5. **Local delivery** (route = processor only, `eject`) overrides all of this on
   three conditions: arrival (dx = dy = 0), a parity error, or the force-eject
   phase of DROP.

## Network interface checks

- **Checksum** (`ni_checksum`):
  - Modulo-2^32 sum of every flit after flit 0, up to the checksum.
  - On injection, `tx_sum` already includes the flit on the input in the same
    cycle, so it can be appended straight after the last flit.
  - On delivery, the last two flits are held back and compared with the running
    sum. `rx_done` pulses on the cycle after EOP, and `rx_err` holds the result
    until the next packet.
- **Delivery check** (`ni_rx_check`):
  - Compares the destination field with `my_id` and flags misdelivery. This
    covers packets ejected early because of a parity error.
  - Latches sequence, tag, source and the multipacket bit.
  - `pkt_v` marks a packet that arrived intact at the right node.
- **Message tracker** (`ni_msg_tracker`):
  - Up to 16 multipacket messages of up to 64 packets are open at once.
  - Each has a 64-bit arrival bitmap, a received count and a 16-bit watchdog.
  - A packet for a message that is not open, or beyond its length, is an
    *extra*. A second copy of a packet is a *duplicate*.
  - A message still incomplete when its watchdog reaches the programmable limit
    is *late*. The report comes one cycle after the limit is reached and does not close the
    message.
  - Only one error is reported per cycle. A pending late report waits for a
    cycle with no arrival error.
  - Single-packet messages have no context and are not tracked.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `fm_controller` | `NET_DELAY2` | 160 | two-Network-Delay window (cycles) |
| | `DLY_W` | 8 | delay counter width |
| | `HOP_DELAY` | 2 | EBN cycles per hop; ERR_PROP = 3×, NET_CLEAR and NORM_HOLD = 2× |
| | `DROP_TIME` | 300 | DROP length |
| | `DIAG_TIME` | 4000 | DIAG length |
| | `PH_W` | 12 | DROP/DIAG counter width |
| `drain_timeout` | `CNT_W`, `LIMIT_RST` | 20, 307200 | counter width and reset limit |
| `flit_counter` | `MAX_FLITS`, `CNT_W` | 20, 5 | maximum packet length |
| `out_timeout` | `CNT_W`, `LIMIT_RST` | 8, 255 | counter width and reset limit |
| `config_reg` | `CFG_W` | 9 | register width |
| `ni_checksum` | `CSUM_W` | 32 | checksum width |
| `ni_msg_tracker` | `NMSG`, `MAXPK`, `WD_W`, `WD_RST` | 16, 64, 16, 65535 | messages, packets per message, watchdog |
| `route_decision` | `ARR_CH` | 4 | channel the frame belongs to (set per instance) |

Runtime-programmable limits have write ports on the top:
- `dto_wr`/`dto_wdata`: drain timeout
- `oto_wr`/`oto_wdata`: output timeout
- `wd_wr`/`wd_wdata`: message watchdog

## Differences from the published architecture, and own choices

- **Header and packet layout.** The published description fixes only that flit 0
  holds the X and Y displacements and that source and destination fields must
  exist. The bit layout, the 7-bit displacement width, the 6-bit sequence and
  4-bit tag fields, and placing the parity bit inside flit 0 are choices made
  here.
- **Packets carry 15 payload flits, not 16.** The published figure of a 2 KB
  message in 64 packets of 16 payload flits does not fit a 20-flit packet that
  also has a routing flit, two header flits and two checksum flits. This design
  keeps the 20-flit limit, so a 2 KB message needs 69 packets, more than the
  tracker's 64.
- **State lengths are own choices.** The description gives no length for
  ERR_PROP, DROP, DIAG or the short hold before NORMAL. These are 6, 300, 4000
  and 4 cycles. NORM_HOLD is a separate state. A 12-bit phase counter times DROP
  and DIAG, in addition to the 8-bit delay counter of the cost table.
- **Diagnostics are not built.** They are software on the processing node. DIAG
  is a fixed-length period during which the configuration register may be
  written.
- **The channel protocol checker sees separate signals.** It takes ownership,
  want, free-frame and start as separate signals, not the four multiplexed
  control lines. It uses a few more state bits than the cost table's two.
- **The checksum is a plain sum.** A CRC was discussed as an alternative.
- **The message tracker is only a bitmap.** It keeps an arrival bitmap in place
  of a reordering buffer, so it detects holes, duplicates and lateness but does
  not reorder payload.
- **Reset values** of the programmable limits (255, 65535) are own choices. So
  is the all-usable reset value of the configuration register.
- **Channels with an empty functional mask.** A packet on such a channel gets an
  empty route list; it is neither delivered nor derouted.

## Not included

- The basic Chaos datapath: frames, crossbar, multiqueue, channel controllers
  and arbitration.
- The processing node's software: eureka policy, diagnostics, network mapping,
  reconfiguration policy.
- Physical parts: package, pins and board wiring.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl --top-module tb_fm_controller \
    rtl/ft_pkg.sv rtl/fm_controller.sv tb/tb_fm_controller.sv
./obj_dir/Vtb_fm_controller
```

For the whole node:

```
verilator --binary --timing -Irtl --top-module tb_ft_chaos_node \
    rtl/ft_pkg.sv $(ls rtl/*.sv | grep -v ft_pkg) tb/tb_ft_chaos_node.sv
./obj_dir/Vtb_ft_chaos_node
```

`tb_ft_chaos_node` builds a 3 × 3 mesh of nodes at default parameters and runs
three phases, about 7000 cycles in total:

1. **Normal operation on node 4:**
   - every routing case, including No Routeback, fast deroute and arrival
   - parity, length, protocol and timeout errors
   - a refused configuration write
   - checksum, misdelivery and every message-tracker outcome
2. **Fault round with diagnostics:**
   - an error eureka, with arrival times checked hop by hop around the broken link
   - a NET_CLEAR loop forced by a held header, then DECISION
   - a diagnostics eureka, and a configuration write in DIAG
   - a return to NORMAL
3. **Drop round:** a drain that never completes is timed out, packets are
   force-ejected and stuck packets cleared.

It counts each mechanism and fails if any count is zero. It also checks the
dwell time of every state, in cycles.

`tb_ebn_torus_1024` checks the synchronisation at the largest size the timing
was sized for. It builds a 32 × 32 torus of `ebn_node` + `fm_controller` pairs at
default parameters, with two broken links, and checks three things:
- Every one of the 1024 routers hears the eureka exactly 2 cycles per hop of its
  shortest working path. The diameter is 32 hops.
- A header held in the most distant router gives every router the same number of
  barrier loops.
- A diagnostics request from the router that enters DECISION last reaches all the
  others inside their windows.

It builds in about half a minute and runs in under a second.

`tb_ni_msg_tracker` ends with the tracker at full load: 16 messages of 64
packets open at once and 1024 arrivals interleaved at random, one per cycle.
All 16 messages must complete, with no error reported.

The unit testbenches for `fm_controller` and `drain_timeout` shorten the windows
by overriding parameters. `tb_drain_timeout` also counts out the full 307,200
cycles once.
