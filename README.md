# MAGNET II switching node in SystemVerilog

MAGNET II is a metropolitan-area network testbed built around Asynchronous Time
Sharing: traffic is split into classes, and each class gets its own share of
switching bandwidth and buffer space. This RTL implements one MAGNET II
switching node:

- a 100 Mb/s slotted ring of stations;
- the ring's cell generator and three-class scheduler;
- the per-station buffers that join the ring to a local bus;
- the Router and T3 interface that join a station to a 45 Mb/s link towards
  another node;
- the monitoring unit that records what every cell did.

Everything is synthesizable and runs in a single clock domain. The clock is
the 100 MHz ring bit clock.

## The ring and its cells

The ring is a serial loop. It starts at the Headend Station, passes every
Network Station once, and ends back at the Headend. The Headend cuts the loop
into back-to-back 1024-bit **cells**. At 100 Mb/s a cell lasts 10.24 µs, which
is 1024 clocks here. Inside a station the ring is handled as 64 words of 16
bits, one word every 16 clocks.

A cell's first 16-bit word carries the cell header and the start of the packet
header:

| bits  | field | meaning |
|-------|-------|---------|
| 15:12 | SYNC  | fixed pattern `1011`, marks the cell start |
| 11:8  | AC    | access code: one-hot subcycle (bit 8 = I, 9 = II, 10 = III); bit 11 = 0 |
| 7     | CS    | first cell of a subcycle |
| 6     | BC    | busy cell: it holds a packet |
| 5     | BR    | busy record: the cell was used somewhere on this trip |
| 4     | T     | the packet has already passed the Headend once |
| 3:2   | MODE  | routing mode: 0 datagram, 1 virtual circuit, 2 multicast |
| 1:0   | SIZE  | packet length: 128 << SIZE bits (8, 16, 32 or 64 words) |

Word 1 is `ROUTE[15:8]` and `DEST[7:0]`. `ROUTE` is the final destination,
the virtual circuit number or the global multicast number. `DEST` is the
address on this ring, or the local multicast number.

Word 2 is `SRC[15:8]`, the class in bits 7:6, and reserved bits. The rest of
the packet is payload. Words after the packet's end are sent as zero.

`magnet_pkg` holds these layouts as packed structs, together with the
constants and the size and threshold helpers.

### What a station does with a passing cell

The `iob` (Input/Output Buffer) delays the word stream by three words. That is
enough to see word 0 of a cell before passing it on. At that moment it
decides:

- **Unicast packet for this station.** The station copies it into its Input
  Buffer and clears BC, which frees the cell. If the Input Buffer is full, the
  packet stays in the cell and `rx_lost` pulses.
- **Multicast packet.** The station copies it if its 256-entry multicast table
  enables that number. Only the station that sent it (SRC equals its own
  address) removes it, so the packet travels exactly once round the ring.
- **Empty or just-freed cell.** The station may fill it from the Output Buffer
  whose class matches the AC, setting BC = BR = 1 and T = 0. A cell freed by a
  removal can be refilled in the same pass. This destination reuse is what
  lets the ring carry more than its nominal rate.

Each class has a LIMIT: the most packets the station may send in that class
per cycle. The register is 9 bits; bit 8 means no limit. A new cycle is
recognised from the cells themselves: a CS cell whose subcycle is not later
than that of the previous CS cell.

### The Headend: cell generator and scheduling

The `cell_generator` exists only in the Headend. It makes a new cell every
1024 clocks and terminates every returning cell:

| returning cell | action |
|---|---|
| BC = 1, T = 0 | Copy the packet into the Transfer Buffer. Send it in the next new cell with BC = BR = T = 1, whatever that cell's class. |
| BC = 1, T = 1 | The packet has already been round once and nobody removed it, so drop it (`discard`). |
| BR = 0 | Nobody used the cell. If it still belongs to the current subcycle, the moveable-boundary procedure ends that subcycle now (`boundary_moved`), when enabled. |

The Transfer Buffer holds three packets. Returning cells are not aligned with
new cells. With back-to-back full-size packets, one packet is still being sent,
one is waiting, and the next is arriving. A two-packet buffer lost every
third packet in that case.

The `ring_scheduler` numbers the cells of a cycle. Cells below MAX I belong
to subcycle I, cells below MAX II to subcycle II, and cells below MAX III to
subcycle III. After MAX III a new cycle starts. The reset values 5/9/15 give
5 + 4 + 6 cells.

A skip from the moveable boundary moves the position to the next boundary.
If the skip happens in subcycle III, a new cycle starts. Subcycles of zero
length get no cells. CS is set on the first cell of every subcycle.

## Inside a station

```
 ring_in ─ miu(rx) ─ iob ─┬─────────────── miu(tx) ─ ring_out      Network Station
                          └─ cell_generator ─ miu(tx) ─ ring_out   Headend Station
                 │
            buffers (IB, OB I/II/III)         hou taps iob in/out + buffer events
                 │
   users ── bus (bus_arbiter, 4 × dest_scheduler) ── router ── t3_tx / t3_rx ── T3 line
```

**`miu`** converts between the serial ring bit and 16-bit words.

- It finds the cell start by hunting for SYNC. It locks only after seeing SYNC
  again exactly one cell later, and drops lock on one missed SYNC.
- There is no line code, so payload that imitates SYNC at the right spacing
  could cause a false lock. A real fibre interface would mark the cell start
  with a line-code symbol.

**The bus** stands in for the VMEbus. It is a synchronous 32-bit path with
one request/grant pair per user, a `bus_target` select and a `bus_last`
marker.

- `bus_arbiter` grants the bus by fixed priority (lowest index wins) or
  round-robin. A user keeps the grant while it keeps requesting.
- Each of the four Output Buffers (IOB I, II, III and Router) has a
  `dest_scheduler`. It keeps a FIFO of the users that asked for the buffer and
  hands it to one user at a time, for one packet. The user is told by a
  one-clock `irq`. The packet's arrival in the buffer hands it on to the next
  user.
- A write is accepted only from the user that holds both the bus and that
  buffer. Anything else pulses `bus_err` and is ignored.

Bus targets: 0–2 = IOB Output Buffer I–III, 3 = Router Output Buffer,
4 = IOB Input Buffer (read), 5 = Router Input Buffer (read). A read returns
the current word combinationally. `bus_last` ends the packet.

**`packet_buffer`** is the single buffer used everywhere.

- It holds `DEPTH` (16) whole packets.
- Its write and read widths can differ (16-bit ring side, 32-bit bus, 8-bit
  link).
- A packet becomes visible only when its last word is written.
- THRESHOLD codes 0–3 mean 2, 4, 8 or 16 packets. At the threshold the buffer
  reports `full` and accepts no new packet.

**`router`** connects the bus to the T3 link. It has one Input Buffer and one
Output Buffer, served first-in first-out, and carries only 1024-bit packets.

- Packets from the link pass through `addr_translator` on the way in. It has
  three 256 × 8 tables: datagram, virtual circuit and multicast. The table
  for the packet's mode, indexed by ROUTE, gives the new DEST. SRC becomes
  this station's address.
- A link packet that arrives while the Input Buffer is full is dropped whole
  (`ev_link_lost`).

**`t3_tx` / `t3_rx`** carry packets in DS3 framing. A DS3 Short Frame is 85
bits: one control bit and 84 data bits. 56 Short Frames form a multiframe.
One 1024-bit packet takes 13 consecutive Short Frames:

| Short Frame | contents |
|---|---|
| SF1 | 8-bit Link Header, then 76 packet bits |
| SF2–SF12 | 84 packet bits each |
| SF13 | the last 24 bits, then 60 unused bits |

When the link is idle, every Short Frame carries a Link Header with flag
`1111`. A packet begins with flag `0000`.

- **Link Header**, sent MSB first: `PSF[3:0]`, TNR, RNR, two reserved bits.
- **TNR**: this side has nothing to send (active low).
- **RNR**: this side's Router Input Buffer is full (active low). The sender
  waits while the far end reports RNR low.

Other details:

- 13 × 85 = 1105 bit times per packet, so the link carries 92.67 % payload.
- The DS3 control bit is sent as 0. The framer that fills in the control bits
  is outside this design; `t3_*_sf_start` stands in for its Short Frame
  timing.
- The T3 side runs from a `t3_bit_en` strobe inside the 100 MHz domain.

**`hou`** (Hardware Observation Unit) writes a 64-bit I-Record into a
1024-entry dual-port memory:

```
[63:48] cell number (mod 64K)   [47:40] MAC in   [39:32] MAC out
[31:24] DEST in   [23:16] SRC in   [15:12] MODE/SIZE in
[11:8]  buffer arrivals (IB, OB I..III)   [7:4] departures
[3:2]   CLASS in   [1] 0   [0] mode
```

- In Continuous Mode it writes one record per cell.
- In Event Mode it writes a record only when some IOB buffer had an arrival or
  departure since the previous record. The flags in a record are the events
  that happened during the previous cell.
- Records are read back through `rd_addr`/`rd_data`. The processor that would
  analyse them is not part of this RTL.

## Control registers

Each station has a `cfg_we/cfg_addr/cfg_wdata` port. It stands for the
station manager's register writes. The top module selects the station with
`cfg_station`.

| address | register | reset |
|---|---|---|
| 0x000–0x0FF | multicast table, bit 0 = receive | 0 |
| 0x100–0x102 | LIMIT I, II, III (bit 8 = no limit) | no limit |
| 0x103 | IOB thresholds {IN, III, II, I}, 2 bits each | all 16 |
| 0x104 | station address | ADDR parameter |
| 0x105 | Router thresholds {OUT, IN} | all 16 |
| 0x106 | HOU {mode, enable} | Continuous, on |
| 0x107 | bus arbiter round-robin | 0 |
| 0x110–0x112 | MAX I, MAX II, MAX III (Headend) | 5, 9, 15 |
| 0x113 | moveable boundary enable (Headend) | 1 |
| 0x400–0x4FF | datagram table | not reset (RAM) |
| 0x500–0x5FF | virtual circuit table | not reset (RAM) |
| 0x600–0x6FF | multicast translation table | not reset (RAM) |

The translation tables are RAMs without reset, so program every entry that
link traffic will use before enabling the link.

## Top level

`magnet_node` builds a ring of `N_STATIONS` (default 4) stations.

- Station 0 is the Headend. Station *i* has address *i*.
- Station *i* feeds station *i*+1, and the last station feeds the Headend.
- User buses, T3 lines, HOU read ports and event pulses come out as arrays
  indexed by station.
- A mesh of several nodes is built by wiring T3 lines between instances.

Default parameters: `PKT_BITS` = 1024, `DEPTH` = 16 packets, `N_USERS` = 4 bus
users per station, `REC_DEPTH` = 1024 I-Records.

## Where this RTL departs from the original design or fills gaps

- **Encodings chosen here.** The original gives field names but not these
  values: the SYNC value, the AC encoding, the MODE/SIZE codes, the positions
  of ROUTE/DEST/SRC in the header, the I-Record layout and the register map.
- **Network Station ring path.** The Network Station passes the IOB output
  straight to the transmitter. Only the Headend has a Cell Generator.
- **Transfer Buffer depth.** It holds three packets; no depth is given for it.
- **Buses and control.** VMEbus signalling, interrupts and station-manager
  access are abstracted to the synchronous ports described above.
- **Losses.** Losses at full Input Buffers are counted, not signalled back to
  the sender.
- **Link output.** The Router has the single FIFO Output Buffer of the built
  system. The three-class link scheduler was only planned, so it is not
  included.
- **Traffic classes.** Three traffic classes are carried, as in the built
  core. A fourth class and priority levels within classes belong to the wider
  concept and are not included.
- **Link packet size.** The link carries only 1024-bit packets. A shorter
  packet written into the Router Output Buffer is still sent as 1024 bits, so
  its tail is whatever the buffer slot held. Writing only full-size packets
  there is up to the bus users.
- **User-to-user transfers.** Transfers between local users that do not
  touch a station buffer are bus traffic only and have no logic here.
- **Parts not included.** Optics, the DS3 framer's control bits, processor
  boards (station managers, HOU processor, user access unit) and the traffic
  control software.
- **LIMIT with the moveable boundary.** The cycle is inferred from CS cells.
  If the moveable boundary removes subcycle I entirely, a station sees the
  cycle start at the first CS cell of the new cycle, whichever subcycle that
  is.

## Verification

Each block has a self-checking testbench in `tb/`, named `<module>_tb`. Each
one ends by printing `TB_RESULT checks=… failures=…` and has a watchdog.

The end-to-end test `magnet_node_tb` runs the node at its default
parameters: four stations, 1024-bit cells, 16-packet buffers. It wires the T3
lines 1↔2 and 0↔3 and checks data end to end. It also counts each mechanism
and fails on any that never occurred:

- unicast delivery and multicast delivery;
- multicast removal by the source;
- reuse of a freed cell;
- LIMIT hold-off;
- moveable boundary;
- Headend transfer and discard;
- Input Buffer loss;
- link transfer with header translation;
- a refused bus write;
- a destination-queue interrupt;
- HOU records.

It finishes in well under a minute of Verilator run time.

`magnet_pkg_tb` checks the package on its own: the header word 0 bit
positions, the SIZE and THRESHOLD codes, and the Short Frame arithmetic.

`station_tb` loops one Headend's ring output and T3 line back to itself.

`ring_throughput_tb` measures what destination removal buys. It also runs the
node at its default parameters. In each station, one bus user keeps all three
class Output Buffers filled with 1024-bit packets for random other stations,
while a second user empties the Input Buffer. Every packet is checked to
arrive intact and exactly once.

With four stations the mean path is two of four hops, so a cell can carry at
most two packets per trip. The bench measures 1.98 packets per generated cell
over 300 cells.

`mesh_tb` joins two nodes with one T3 link. A datagram crosses ring A,
the link (with translation at the far Router) and ring B. Bus users in the
two gateway stations forward it from buffer to buffer, as local users do in a
MAGNET II mesh.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/magnet_pkg.sv tb/magnet_node_tb.sv \
          --top-module magnet_node_tb
./obj_dir/Vmagnet_node_tb
```

The same command works for every block testbench; substitute its name.
