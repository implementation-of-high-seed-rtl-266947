# Hardware UDP/IP router stack for a high-altitude-platform link

This is a small network protocol engine written entirely in logic. It sits
between an Ethernet PHY (through its 4-bit MII) and a PC, and it handles the
protocols that connect the two without a processor:

- Ethernet II framing with FCS,
- ARP, answering requests and resolving addresses,
- IPv4, with header checksums, fragmentation on send and reassembly of UDP
  datagrams on receive,
- ICMP echo ("ping"),
- UDP, storing received messages in a RAM and sending messages from it.

The PC reaches the router only through that RAM. It reads what the network
delivered, and writes what is to be sent. The design is meant for a
communication node on a high-altitude platform, where it passes data between
the satellite/ground link (behind the PHY and a modem) and local computers.
The target rate for that use is 10 to 15 Mb/s. On a 100 Mb/s MII the stack
sends UDP data at about 94 Mb/s.

The set of layers and how they connect come from the original description of
the router. That description says what each layer does but gives almost none
of its inner workings, so interfaces, encodings, sizes and policies here are
this implementation's own choices. Section "Where this RTL departs or
chooses" lists them.

## Block map

```
            MII rx                                             MII tx
  PHY ───────────────► eth_rx                       eth_tx ──────────► PHY
                        │  │ type 0 = ARP             ▲
                        │  └──────────► arp_rx ──┐    │ frames of type ARP or IP
                        │ type 1 = IP     │ upd   │    │
                        ▼                 ▼       │ reply request
                      ip_rx           arp_table ◄─┼── arp_tx  (ARP replies/requests,
                    proto 1│ proto 17      lookup │    ▲       MAC lookup, pass-through)
                       ▼   ▼                      └───►│
                    icmp  udp_rx ──writes──┐           ip_tx   (header, checksum,
                      │                    │            ▲       fragmentation)
                      │  echo reply        ▼            │
                      └────────────►  hdlc ◄── udp_tx ◄─┼─reads── stack_ram
                                   (hand-over arbiter)  │           ▲
                                            └───────────┘      memory_mux
                                                                    ▲
                                                       PC ───► pc_sram_if
```

`stack` is the top level. It holds all of the above, including the RAM.

| module | role |
|---|---|
| `eth_rx` | MII nibbles to bytes; SFD hunt; MAC filter (own MAC or broadcast); type demux; CRC-32 check |
| `eth_tx` | preamble, SFD, MAC header, payload, padding to 60 bytes, FCS, 12-byte gap |
| `arp_rx` | parses ARP packets; inserts or updates the sender in the table; asks for a reply |
| `arp_table` | 8 IP/MAC pairs; combinational lookup; round-robin replacement |
| `arp_tx` | sends ARP replies and requests; resolves a datagram's MAC; passes IP frames through |
| `ip_rx` | checks the IPv4 header; reassembles fragmented UDP datagrams; hands the payload to ICMP or UDP |
| `ip_tx` | builds IPv4 headers; splits large datagrams into fragments |
| `icmp` | buffers an echo request and sends the echo reply |
| `udp_rx` | stores the data of datagrams for one port in the RAM, each byte at its place in the datagram |
| `udp_tx` | sends a UDP datagram whose data lies in the RAM |
| `hdlc` | round-robin hand-over of ICMP replies and UDP sends to the IP sender |
| `stack_ram` | 16 KiB simple dual-port byte RAM |
| `memory_mux` | shares the RAM ports between the stack and the PC |
| `pc_sram_if` | the PC's byte-command port to the RAM |
| `hsr_pkg` | shared constants, the frame-type enum, the counter struct, CRC-32 and ones'-complement helpers |

## How bytes move between layers

Everything runs on one clock. The MII receive and transmit clocks are taken
to be that clock: 25 MHz for 100 Mb/s Ethernet. An MII carries one nibble per
clock, so a byte occupies two clocks. This fixed pace is what shapes the
interfaces.

**Receive side: push, no back-pressure.** `eth_rx` emits at most one byte
every two clocks (`valid`, `data`, `sof` on the first byte). The frame type
goes with it (`frame_type_t`: 0 = ARP, 1 = IP). Every layer above parses on
the fly by counting bytes. None of them can stall the wire.

The FCS is only known when `rx_dv` falls. So `eth_rx` streams the payload
first and then gives its verdict. An end pulse (`fr_eof`) carries `fr_ok`,
which means the CRC residue was right and `rx_er` was never seen. Upper layers
accumulate while the bytes stream and commit only when the end comes with
`ok`:

- `arp_rx` updates the table only then.
- `icmp` requests a reply only then.
- `ip_rx` counts a UDP fragment as received only then, and `udp_rx` raises
  `msg_valid` only when the whole datagram is complete.

The data of a bad UDP frame may already be in RAM, but it is never reported.

`ip_rx` decides at the last header byte whether to forward the payload. The
datagram must be version 4, and the ones'-complement sum of the header must be
FFFFh. It must be addressed to `MY_IP` or to 255.255.255.255. Its protocol
must be 1 or 17, and only a UDP datagram may be a fragment. The payload
stream then stops at the IP total length, so Ethernet padding and FCS bytes
never reach ICMP or UDP.

**Send side: pull, and the source must never be empty.** A started MII frame
cannot pause. So `eth_tx` pulls payload bytes with a one-clock `pl_ready`
strobe, at most one every two clocks, and the source must have the byte ready
in that same clock. That ready signal passes combinationally up the chain:
`eth_tx` → `arp_tx` → `ip_tx` → `hdlc` → `icmp` or `udp_tx`. Each layer
either supplies bytes from its own registers (headers) or forwards the pull
upward (payload). Two blocks need care to meet this:

- `icmp` reads its reply from a buffer with an asynchronous read.
- `udp_tx` reads the RAM one clock ahead into a two-byte buffer. It fills
  that buffer while its 8-byte header goes out.

If a byte is ever missing, `eth_tx` sends 00h and counts an underrun. The
tests check that this never happens.

**Requests** between send-side layers are level handshakes: a request held
high until a one-clock acknowledge. Examples are `icmp`/`udp_tx` → `hdlc`,
`hdlc` → `ip_tx`, and `arp_rx` → `arp_tx`. The one exception is
`arp_tx` → `eth_tx`: a one-clock `req`, accepted only while `busy` is low.

## ARP: answering and resolving

`arp_rx` acts only on Ethernet/IPv4 ARP packets whose target address is
`MY_IP`. It writes the sender's IP/MAC pair to the table. A known IP gets its
MAC replaced; a new one takes a free entry, or the round-robin victim when the
table is full. For a request it also raises `reply_req` towards `arp_tx`. A
second request that arrives while a reply is still pending updates the table
but gets no reply.

`arp_tx` starts a frame only while `eth_tx` is idle. So it is unavailable for
the whole time a frame, its padding, FCS and gap are on the wire. When idle it
serves, in this order:

1. **A pending ARP reply.**
2. **A datagram from `ip_tx` whose next hop is in the table.** It starts an IP
   frame to the cached MAC, pulses `ip_grant`, and connects the IP byte stream
   to `eth_tx`. The next hop is always the destination itself; there is no
   gateway.
3. **A datagram whose next hop is not in the table.** It broadcasts an ARP
   request once. Then it keeps the datagram waiting and re-checks the table
   every idle clock. If no answer has arrived after `ARP_WAIT` clocks
   (1,000,000 by default, 40 ms at 25 MHz), it pulses `ip_fail`. `ip_tx` then
   pulls the rest of that payload from its source and discards it, so the
   source is never left waiting.

## Fragmentation on send, reassembly on receive

`ip_tx` splits a payload longer than `MTU − 20` into fragments. Each carries
`FRAG_MAX = ⌊(MTU − 20)/8⌋·8` bytes (1480 for MTU 1500). The
more-fragments flag is set on all but the last, and the offset is counted in
8-byte units. All fragments share one identification value, which counts up
per datagram. Each fragment goes through the ARP sender as a frame of its own.
An assertion checks that every non-final fragment is a multiple of 8 bytes.

On receive, UDP datagrams are reassembled in place in the RAM rather than in
a buffer of their own:

- **Byte positions.** `ip_rx` tags every UDP payload byte with `pl_pos`, its
  position in the whole datagram (fragment offset × 8 plus its index in the
  fragment). `udp_rx` takes bytes 0 to 7 as the UDP header and writes data
  byte `pl_pos − 8` to RAM address `pl_pos − 8`. Fragments may therefore
  arrive in any order.
- **One context.** `ip_rx` keeps a single reassembly context: source address,
  identification, payload bytes received so far, and the total length. The
  total becomes known when the fragment without more-fragments arrives
  (its offset plus its length).
- **Completion.** A fragment counts only if its frame ends good. When the
  count reaches the total, `pl_done` pulses with the total length. `udp_rx`
  then checks the port and the UDP length field, and reports the message.
  A datagram that is not fragmented is simply a context that opens and
  closes in one frame.
- **Abandoning.** A UDP fragment from another datagram replaces an
  unfinished context, and this is counted in `ip_frag_drops`. A lost fragment
  therefore holds the context only until the next UDP datagram arrives.
  There is no timer.

Limits: overlapping or repeated fragments are not detected, and they can
make a datagram look complete too early. Only one datagram is reassembled
at a time. Interleaved fragments of two datagrams keep abandoning each
other. ICMP datagrams are not reassembled; an ICMP fragment is dropped and
counted in `ip_frag_drops`.

## The shared RAM and the PC port

`stack_ram` has one write port and one read port, with a one-clock read.
Its two clients use it as follows:

- **The stack streams at wire speed.** `udp_rx` writes received data from
  address 0 up. The lower half of the RAM (8 KiB) is its receive area; data
  beyond 8 KiB is not stored.
  `udp_tx` reads the data it sends from the address given with `udp_send`.
- **The PC** goes through `pc_sram_if`.

`memory_mux` arbitrates each port every clock. The stack always wins, since it
cannot wait. A PC access takes the first clock in which the stack leaves that
port free. Read data is marked valid for whichever side issued the read.

Only one received message is held at a time. `udp_msg_valid` stays high, with
the length, source address and source port, until the PC side pulses
`udp_msg_ack`. While it is high, the receive area is not written. A datagram
for the port is dropped and counted in either case:

- it completes in the meantime;
- any of its bytes had to be skipped in the meantime.

Datagrams for other ports are written to the receive area, as long as no
message is waiting, but are never reported. The port is only known once the
first fragment has arrived.

The PC sends bytes on `pc_din`, each marked by a one-clock `pc_stb`:

| command | bytes | effect |
|---|---|---|
| write | `01h, addr_hi, addr_lo, data` | RAM[addr] ← data |
| read  | `02h, addr_hi, addr_lo` | RAM[addr] returned on `pc_dout` with a one-clock `pc_dout_valid` |

`pc_busy` is high from the last byte of a command until the command has been
carried out. Bytes strobed meanwhile are ignored, and so are unknown command
bytes, which are also counted. Address bits above `RAM_AW` are ignored.

A UDP send is started directly on top-level ports. `udp_send` is a one-clock
pulse, given together with `udp_dst_ip`, `udp_dst_port`, `udp_src_port`,
`udp_len` and `udp_base`. `udp_busy` and `udp_done` report progress. The UDP
checksum is sent as 0 (not computed, which IPv4 allows). It is not checked on
receive either.

## ICMP

`icmp` buffers a whole message (up to `ICMP_BUF` = 512 bytes). While it does
so, it keeps two ones'-complement sums:

- one over everything, which must come to FFFFh;
- one over everything after the 4-byte header.

The reply checksum is the complement of the second sum, because type and code
become 0 in the reply. The identifier, sequence number and data are echoed
back from the buffer. Only echo requests are answered. No other query is
answered, and no error message (destination unreachable and the like) is
generated. A request that arrives while a reply is pending is dropped.

## Top-level interface (`stack`)

| parameter | default | meaning |
|---|---|---|
| `MY_MAC` | 02:00:00:00:00:01 | own MAC address |
| `MY_IP` | 192.168.1.2 | own IPv4 address |
| `UDP_PORT` | 5000 | port whose datagrams are stored |
| `RAM_AW` | 14 | RAM of 2^14 bytes; the lower half is the receive area |
| `ARP_ENTRIES` | 8 | ARP table size |
| `MTU` | 1500 | largest IP datagram sent |
| `ARP_WAIT` | 1,000,000 | clocks to wait for an ARP answer |
| `ICMP_BUF` | 512 | largest echo message answered |

Ports:

- **MII:** `rxd[3:0]`, `rx_dv`, `rx_er`, `txd[3:0]`, `tx_en`.
- **PC:** `pc_stb`, `pc_din`, `pc_dout`, `pc_dout_valid`, `pc_busy`.
- **UDP send:** `udp_send`, `udp_dst_ip`, `udp_dst_port`, `udp_src_port`,
  `udp_len`, `udp_base`, `udp_busy`, `udp_done`.
- **UDP receive:** `udp_msg_valid`, `udp_msg_len`, `udp_msg_src_ip`,
  `udp_msg_src_port`, `udp_msg_ack`.
- **Counters:** `stats`, a `stack_stats_t` of twelve 8-bit wrapping counters
  (bad frames, ARP requests, replies and drops, dropped ICMP fragments and
  abandoned reassemblies, IP checksum drops, fragments sent, echo replies, UDP drops, transmit underruns, bad PC
  commands, ARP entries in use).

The reset `rst_n` is active low and asynchronous.

## Where this RTL departs or chooses

These points follow the original description:

- the list of layers and their connections;
- MII with `rx_dv`/`rx_er`;
- the frame-type bit (0 = ARP, 1 = IP);
- insert-or-update of the ARP table and the reply request to the ARP sender;
- the ARP sender's unavailability while the Ethernet sender is busy;
- fragmentation on send;
- UDP storage in RAM with the checksum ignored;
- a RAM shared by the layers and the PC.

These are choices of this implementation:

- **One clock.** The MII receive and transmit clocks are not separate clock
  domains.
- **The "HDLC" unit.** The original names an HDLC unit that gathers the
  receive-side results and passes them to the send side. No HDLC framing is
  described, so here the unit is a round-robin hand-over arbiter and nothing
  more.
- **ICMP and UDP side by side.** The original places ICMP between UDP and IP.
  Here the two are siblings above IP, demultiplexed by the protocol field.
- **Reassembly for UDP only.** The original says a datagram is passed up
  once no more fragments are coming, but gives no buffer, size or timeout.
  Here reassembly works in place in the RAM with one context and no timer,
  and ICMP fragments are dropped.
- **No ICMP error reports.** The original has the IP receiver hand faulty
  datagrams to ICMP. Here they are counted and dropped.
- **ARP replies to requests only.** The original says that after an insert
  or update the entry is sent to the ARP sender. Here only an ARP request
  makes the ARP sender answer.
- **ICMP limited to echo.** The original lists the other query and error
  messages but not when they are sent.
- **DHCP** is mentioned in the original but not designed; it is not built.
- **Own sizes and policies:** all sizes, addresses and the RAM layout; the
  FCS check and address filter; ARP wait-and-drop; the PC byte protocol;
  stack priority on the RAM; holding one UDP message at a time.

The original reports 1897 LUTs, 1517 registers and an 8.27 ns worst-case
delay on a Cyclone III EP3C25. These figures are not reproduced. Generic
synthesis of this RTL gives about 2560 flip-flop bits, most of them in the
ARP table and packet registers, plus the 16 KiB RAM and the 512-byte ICMP
buffer. No FPGA timing analysis has been run.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends
with a `TB_RESULT checks=… failures=…` line and has a watchdog. The shared
reference package `tb/tb_net_pkg.sv` builds Ethernet, ARP, IPv4, ICMP and UDP
packets, CRC-32 and Internet checksums straight from the standards, so the
checks do not reuse the design's own code.

`tb_stack` runs the whole router at its default parameters through:

- ARP reply, table insert and update;
- ping;
- drops for a bad FCS, a bad IP checksum and an ICMP fragment;
- UDP reception read back by the PC while the PC competes with the stack for
  the RAM;
- a UDP overflow drop;
- a 2000-byte UDP datagram reassembled from two fragments sent last first;
- UDP sends: plain, fragmented into three IP fragments, via an ARP request,
  and an ARP timeout;
- ICMP and UDP competing for the IP sender.

It counts each mechanism, fails if one never happened, and checks that the UDP
send rate is at least 15 Mb/s (it measures about 94 Mb/s). It takes about one
second.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_stack rtl/hsr_pkg.sv tb/tb_net_pkg.sv tb/tb_stack.sv -o sim
./obj_dir/sim
```

For another block, replace `tb_stack` with `tb_<module>`. The
`tb_memory_mux` bench also uses `stack_ram`, which `-y rtl` finds. Verilator
has two-state simulation, so the testbenches initialise everything they drive.
