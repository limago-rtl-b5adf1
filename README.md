# Limago: a 100 GbE TCP/IP offload stack in SystemVerilog

This is a TCP/IP stack in hardware for one 100 Gbit/s Ethernet port. It terminates TCP
connections on the FPGA: it answers ARP and ping, keeps the state of up to 10,000 TCP
connections, and moves their payload between the network and an application through
stream ports. The datapath is 512 bits wide and runs at 322 MHz, the clock of a 100G
Ethernet MAC, so that one 64-byte word can move every cycle. Payload buffers live in external
memory (DDR4), one circular buffer per connection and direction. The per-connection state
(sequence numbers, windows, TCP state, timers) stays on chip and is indexed by a 16-bit
session ID.

The design follows the architecture of the Limago stack, an open-source 100 GbE
TCP/IP stack built for Xilinx UltraScale+ FPGAs. That stack is written mostly in
high-level synthesis. The RTL here is an independent rewrite of its blocks as
synthesizable SystemVerilog state machines. Where the original describes a block only by
its function, the block here is the simplest circuit that does that job. The
departures are listed near the end.

## Packet path

```
            +-------------------+    ARP frames    +------------+
 s_eth ---->|  inbound_handler  |----------------->| arp_server |------------+
 (frames)   |  MAC/type/IP      |    ICMP (IPv4)   +------------+            |
            |  classification   |------------------>| icmp_server |----------+|
            |  strips Ethernet  |    TCP (IPv4)    +-------------+          ||
            |  header           |------------------>|     toe     |-------+ ||
            +-------------------+                   +-------------+       | ||
                                                   app ports, memory ports | ||
            +-------------------+                                          | ||
 m_eth <----| outbound_handler  |<-----------------------------------------+-++
 (frames)   | ARP > ICMP > TCP  |<--- MAC lookup ---- arp_server
            | adds Ethernet hdr |
            | pads to 60 bytes  |
            +-------------------+
```

* **Stream format.** Every stream is a 512-bit AXI4-Stream beat `{data, keep, last}` with
  valid/ready (`limago_pkg::axis_t`). Byte 0 of a packet is in `data[7:0]`, and
  multi-byte header fields are big-endian in the byte order of the wire. `keep` has one bit per
  byte, and only the last beat of a packet may be partial.
* **Inbound Packet Handler** (`inbound_handler`). It accepts frames addressed to its own MAC
  or to broadcast. It sends ARP frames to the ARP module. IPv4 packets without options that are
  addressed to its own IP go, without their Ethernet header, to the ICMP module (protocol 1)
  or to the TOE (protocol 6). Everything else is dropped and counted. Frames are queued per
  destination, so a slow consumer holds back only its own traffic.
* **ARP** (`arp_server`). It answers requests for its own address and learns every sender.
  It sends a gratuitous ARP after reset, and serves MAC lookups for the outbound side in one
  cycle. On a miss it sends a request; the packet that missed is dropped and TCP
  re-transmits it. The table has 256 entries indexed by the last byte of the IP
  address, so one /24 subnet.
* **ICMP** (`icmp_server`). It answers echo requests. It swaps the addresses, sets type 0 and
  updates the checksum incrementally.
* **Outbound Packet Handler** (`outbound_handler`). It takes one whole packet at a time, with
  ARP first, then ICMP, then TCP. For IPv4 it looks up the destination MAC, prepends the
  Ethernet header with the helper `axis_insert`, and pads short frames to 60 bytes.

The Ethernet MAC (the 100G CMAC and its LBUS-to-AXI4-Stream adapter), the memory
controller and the host DMA are not part of this RTL. `limago_top` exposes their
connections as ports:
* the Ethernet streams;
* two buffer-memory ports;
* the statistics AXI4-Lite port.

## The TCP offload engine (`toe`)

The TOE is where most of the difficulty lies. It is a set of independent engines around
shared per-session tables:

| Table | Contents per session | Clients (port order = priority) |
|---|---|---|
| Session Lookup (`session_lookup` + `cuckoo_cam`) | three-tuple ↔ session ID | Rx Engine, Tx App If; reverse lookup for the Tx Engine |
| Port Table (`port_table`) | CLOSE / LISTEN / ACTIVE per local port | Rx Engine, Tx App If |
| State Table (`state_table`) | RFC 793 state | Rx Engine, Tx App If, Tx Engine, TIME-WAIT expiry |
| Rx SAR (`sar_table`) | `recvd`, `app_rd` | Rx Engine, Rx App If, Tx Engine |
| Tx SAR (`sar_table`) | `una`, `nxt`, `app_w`, peer window, scale | Rx Engine, Tx Engine, Tx App If |
| Timers (`timer_array` ×3) | armed flag + expiry time | re-transmission, probe, TIME-WAIT |

Each table is an array with several request ports and a fixed-priority arbiter. A request
is one cycle, and its answer (the record before any write) comes on the next cycle. The
State Table also has a lock, so that a read-modify-write is atomic. A locked read keeps every
other client away from that session until the same client writes it back.

### Rx Engine

The Rx Engine (`rx_engine`) has two stages.
* **Stage A** works at line rate, one beat per cycle. It parses the first beat of each
  segment, forms the TCP pseudo-header sum, and checksums the segment with `csum_acc` (the
  one's-complement sum of a whole beat per cycle). The segment goes into a 64-beat FIFO,
  and its parsed fields and checksum verdict go into an 8-entry metadata FIFO. The input
  never stalls: a segment that does not fit is dropped whole.
* **Stage B** is a state machine that handles one segment at a time. It checks the checksum,
  then the destination port (a SYN to a CLOSE port is answered with RST). It then looks up or
  creates the session, reads the state (locked) and both SAR records, and, for SYN segments,
  walks the TCP options (`tcp_opt_parser`, one option per cycle) to find the Window Scale.
  It then decides and writes back, in order:
  * the new state and SAR fields;
  * at most one event for the Tx Engine (SYN-ACK, ACK, TX or FIN);
  * timer arm/clear commands;
  * an application notification;
  * the in-order payload, written to the Rx Buffer.

  A segment takes about 15 cycles plus one cycle per payload beat.

### Tx Engine and Event Engine

Every outgoing segment starts as an event. The Event Engine (`event_engine`) merges events
into one queue from four kinds of source:
* the Rx Engine;
* the Tx App If (SYN, data, FIN);
* the re-transmission and probe timers;
* the Tx Engine itself, when a transmission needs more than one segment.

The Tx Engine's own continuation event has one queue slot reserved. The Tx Engine waits for
that event to be queued before it takes the next one. Without the reserved slot, a queue
filled by the other sources would deadlock.

The Tx Engine (`tx_engine`) handles one event at a time:
1. reads the tuple, the state and both SAR records;
2. decides the segment (flags, sequence number, payload length up to the MSS and the peer's
   window);
3. reads the payload from the Tx Buffer while summing it;
4. builds the IPv4 and TCP headers, including the Window Scale option on SYN and SYN-ACK;
5. prepends them with `axis_insert`, and writes back `nxt` and the re-transmission timer.

* **Re-transmission** goes back to `una` (go-back-N).
* **A zero-window probe** is an empty ACK whose sequence number is one below the next byte.
  The receiver must answer it with its current window.

### Buffers, windows and window scaling

Session *s* owns 2^(16+WS) bytes of each buffer memory, starting at byte address *s*·2^(16+WS).
A byte with sequence number *n* lives at offset *n* mod 2^(16+WS).

`mem_access` turns `{session, offset, length}` commands plus a byte stream into 64-byte word
writes with byte strobes. It re-aligns by shifting and carrying bytes between beats, and wraps
the word index at the end of the region. The read side works the same way in reverse: it has
up to 16 word reads outstanding and strips the leading bytes of the first word.

The receive window advertised is the free space in the Rx Buffer, shifted right by the
negotiated scale. The scale is the smaller of the local `WS_LOCAL` and the peer's offer, or 0
if the peer sends no option. The number of sessions that external memory can hold is
2^(memory bits − WS − 16). For example, 4 GiB with a scale of 7 holds 512 sessions.

### Application interface

* **Commands.** `lis_*` listens on a port below 32768. `op_*` opens a connection from an
  ephemeral port (32768 and up). `cl_*` closes a connection.
* **Sending.** `tx_*` asks to send *len* bytes. When the Tx Buffer has room, the answer is ok,
  and the application then streams exactly *len* bytes on `s_app`.
* **Notifications.** `nt` carries {data, opened, accepted, closed}, with the session and, for
  data, the number of bytes.
* **Reading.** `rq_*` asks for up to *len* bytes of a session. `rd_rsp_len` says how many
  follow on `m_app`. Reading advances `app_rd`, which reopens the receive window.

## CuckooCAM

`cuckoo_cam` maps the 64-bit three-tuple {remote IP, remote port, local port} to the
session ID. It has two tables, each addressed by its own hash of the key, plus an 8-entry
fully associative stash.
* **Lookup.** A lookup reads both slots and the stash, and answers two cycles after the
  request.
* **Insert.** An insert fills a free slot. If both slots are taken, it evicts the occupant of
  table 0 and moves it to its other slot. It repeats this up to 16 times, then parks the
  leftover entry in the stash.

With 2 × 8192 slots for 10,000 sessions, the tables run at 61 % load.

## Parameters (`limago_top`, `toe`)

| Parameter | Default | Meaning |
|---|---|---|
| `MAX_SESS` | 10000 | sessions (size of every per-session table) |
| `TAB_AW` | 13 | log2 of each CuckooCAM table (2 × 8192 slots) |
| `WS_EN` | 1 | Window Scale option supported |
| `WS_LOCAL` | 0 | own scale: buffers are 2^(16+WS_LOCAL) bytes |
| `MSS` | 1460 | largest payload per segment |
| `TICK` | 322 | cycles per timer tick (1 µs at 322 MHz) |
| `RT_DELAY`, `PR_DELAY` | 1000 | re-transmission / probe time-out, ticks |
| `TW_DELAY` | 10000 | TIME-WAIT, ticks |

The default configuration is 10,000 sessions without window scaling. Its tables use about
5.2 Mbit of on-chip memory.

## Where this design departs from the original

* The checksum adds a whole beat with an adder tree. The original uses 7:3 carry-save adders.
  The result and the one-cycle-per-beat rate are the same.
* The CuckooCAM answers a lookup in two cycles, not one.
* The Rx Engine's stage B handles one segment at a time, at about 15 cycles plus one cycle per
  beat. For 1,460-byte segments this is about 300 bits per cycle, just under line rate
  (311 bits per cycle at 100 Gbit/s and 322 MHz). Line rate has not been shown in simulation.
* Segments that arrive out of order are not buffered; a duplicate ACK is sent instead.
  Re-transmission is go-back-N.
* A FIN from the peer is answered at once with the stack's own FIN; there is no half-closed
  sending. Only the Window Scale option is parsed, and IPv4 options are not accepted.
* Buffer wrap-around is handled per 64-byte word inside one transfer, not by splitting the
  transfer in two.
* The timer tick and time-outs, the ARP table organisation, and the application interface
  protocol are this design's own choices.

## Simulation

The testbenches are self-checking. Each one prints `TB_RESULT checks=N failures=M` at the
end and stops itself with a watchdog. Build and run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/limago_pkg.sv tb/tb_limago_top.sv --top-module tb_limago_top
./obj_dir/Vtb_limago_top
```

* **`tb_limago_top`** connects two nodes back to back through a link model that can drop or
  corrupt frames. Each node is `tb_node`, which holds the stack and a behavioural model of
  each buffer memory (`mem_model`). The nodes use 16 sessions and short timers. Node A has
  scale 2 and node B scale 1. The test covers:
  * an ARP miss resolved by request and reply, and a ping;
  * a frame for a foreign MAC;
  * a RST answering a SYN to a closed port;
  * a handshake with the scale negotiated to 1.

  A then sends 300,000 bytes in random chunks, and B echoes them back. On the way:
  * one segment is lost and one is corrupted;
  * B stops reading, so that its window closes and A probes.

  Finally A closes the connection and waits out TIME-WAIT. Every one of these mechanisms is
  counted, and a mechanism that never happens is a failure. Add `+trace` to print every frame
  and event.
* **`tb_limago_full`** runs the same scenario with every parameter at its default:
  * 10,000 sessions and 64 KiB buffers;
  * 1 ms time-outs and a 10 ms TIME-WAIT.

  It simulates about 6 million cycles. At this size the probe is not required: the sender's
  buffer equals the receiver's window, so a closed window leaves nothing unsent.
* **Unit testbenches.** `tb_csum_acc`, `tb_cuckoo_cam`, `tb_tcp_opt_parser`, `tb_timer_array`,
  `tb_statistics`, `tb_port_table`, `tb_state_table`, `tb_sar_table`, `tb_event_engine`
  and `tb_icmp_server`
  each check one block against a reference model in the testbench.
  Where a timing is defined, they also check cycle counts:
  * the checksum one cycle after the last beat;
  * the CAM lookup in two cycles;
  * one option per cycle;
  * expiry within one tick and one scan;
  * table answers one cycle after the request is taken;
  * the port table clear after reset (65,536 cycles).

  The table testbenches drive all clients at once on a few sessions, so requests collide.
  They check the arbitration order and the State Table locks. The Event Engine testbench
  checks the priority order and the queue entry kept for the Tx Engine.

The two-state simulator starts registers at random values. Every state that is read is
reset, or cleared by an initial loop (the memories).
