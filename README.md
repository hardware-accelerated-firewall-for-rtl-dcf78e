# Hardware 5G firewall (GTP-aware packet filter)

In a 5G network, user traffic between the edge (radio access and mobile edge
computing) and the core is carried inside GTP tunnels: every user packet is
wrapped in an outer IPv4/UDP header and a GTP-U header. A conventional
firewall sees only the outer headers, which name the tunnel endpoints rather
than the users. This firewall looks inside the tunnel. It parses

    Ethernet | outer IPv4 | outer UDP | GTP-U | inner IPv4 | inner TCP/UDP

and matches the **inner** addresses, ports and protocol, plus the GTP tunnel
identifier (TEID), against a ternary rule table. A packet that hits a rule is
dropped. Everything else is forwarded unchanged (allow by default). Rules can
be inserted and removed from a host over a register bus while traffic flows.

The RTL is a hand-written equivalent of a three-stage packet pipeline (parser,
match/action, deparser) for an FPGA network card with 10 Gb/s ports. It has
an AXI4-Stream packet input and output and an AXI4-Lite port for rules.

## Pipeline

```
            +--------------------- packet buffer (sync_fifo) ---------------------+
 s_t* ----->|                                                                     |--> deparser --> m_t*
    |       +---------------------------------------------------------------------+      ^
    |                                                                                    |
    +--> gtp_parser --key,ok--> match_action (tcam) --drop--> decision queue (sync_fifo) -+
                                      ^
 AXI4-Lite --> rule_ctrl -------------+ (rule writes)
```

| module | role |
|---|---|
| `fw5g_top` | wires the pipeline, input flow control, event outputs |
| `gtp_parser` | header window capture and header walk; produces the lookup key and an "expected structure" flag |
| `match_action` | TCAM lookup; hit → DROP, miss → forward; non-GTP packets skip the table |
| `tcam` | ternary rule table, lowest index wins |
| `sync_fifo` | packet buffer and decision queue |
| `deparser` | forwards or discards each buffered packet according to its decision |
| `rule_ctrl` | AXI4-Lite registers to stage and commit rules |
| `fw_pkg` | key type, protocol constants, register map |

Every beat the firewall accepts is written into the packet buffer and, at the
same time, seen by the parser. The parser never stalls the stream. Once it
has a packet's first `HDR_BYTES` bytes (or the whole packet, if shorter), its
verdict goes through the TCAM and a one-bit decision enters the decision
queue. The deparser takes one decision per packet. It then moves that packet's
beats out of the buffer, either to `m_t*` or into nothing. A decision is
known as soon as the header window has arrived, so a packet longer than the
buffer still passes: the rest of it streams through (cut-through).

### Timing

* The parser's result comes 2 cycles after the beat that completes the header
  window. The TCAM adds 1 cycle. The decision is readable from the queue in
  the next cycle.
* For a short packet with no output stall, the first output beat appears 4
  cycles after the packet's last input beat was accepted.
* Throughput is one beat per cycle in and out. Back-to-back packets leave with
  no idle cycle between them.
* `s_tready` goes low when the packet buffer is full. It also goes low when
  the decision queue has no more than 4 free entries: up to three decisions
  can already be in the parser/TCAM pipeline and must still fit.

## What the parser accepts

The parser copies the first 128 bytes (4 beats of 32 bytes) into a window and
walks it with variable offsets:

| header | checks | extracted |
|---|---|---|
| Ethernet | EtherType 0x0800 | – |
| outer IPv4 | version 4, IHL ≥ 5 (options allowed), protocol 17 | IHL → offset of UDP |
| outer UDP | destination port 2152 (GTP-U) | – |
| GTP-U | version 1, PT = 1, spare bit 0, message type 0xFF (G-PDU); if E, S or PN is set, the 4-byte optional word; if E, up to `MAX_EXT` = 2 extension headers (length in 4-byte units, non-zero; the chain must end with next-type 0) | TEID |
| inner IPv4 | version 4, IHL ≥ 5 | source, destination, protocol |
| inner TCP/UDP | only when the inner protocol is 6 or 17 | source and destination port |

Each byte the walk needs must lie inside both the window and the packet. If
the packet fails any check, `res_ok` is 0. Such a packet is **not looked up
and is forwarded** (the bypass case): the firewall filters 5G user traffic
and lets everything else through under its allow-by-default policy. For an
inner protocol other than TCP or UDP (ICMP, for example), the ports in the key
are 0 and the packet is still looked up.

Byte order on the stream: byte *i* of a beat is `tdata[8*i+7:8*i]`, and `tkeep`
is contiguous from bit 0 (NetFPGA convention).

## Rules and the TCAM

The lookup key (`fw_pkg::fw_key_t`, 136 bits, MSB first):

| bits | field |
|---|---|
| 135:104 | inner source IPv4 (the 5G user) |
| 103:72 | inner destination IPv4 |
| 71:56 | inner source port |
| 55:40 | inner destination port |
| 39:32 | inner IP protocol |
| 31:0 | GTP TEID |

A rule is a value, a care mask (1 = compare this bit) and a valid bit. Entry
*i* matches when it is valid and `((key ^ value) & mask) == 0`. When several
rules match, the one with the **lowest index** wins. Index therefore means
priority. The only action is DROP, so a hit always drops. With no hit the
packet is forwarded.

The TCAM is `N_RULES` × (value + mask) flip-flops, all compared in parallel
in every cycle. A 512-entry table needs about 139 k flip-flops for the entries
alone, plus 512 comparators of 136 bits. That is the cost of the default size.

### Managing rules (`rule_ctrl`, AXI4-Lite, 32-bit registers)

| address | register | |
|---|---|---|
| 0x00–0x10 | KEY[0..4] | rule value; KEY[0] = key bits 31:0, KEY[4] bits 7:0 = key bits 135:128 |
| 0x20–0x30 | MASK[0..4] | care mask, same layout |
| 0x40 | INDEX | rule slot |
| 0x44 | CMD | write bit0 = 1: insert KEY/MASK at INDEX; bit1 = 1: remove INDEX (remove wins if both are set) |
| 0x48 | INFO | read only: `N_RULES` |

To insert a rule, write KEY, MASK and INDEX, then write CMD = 1. To remove
one, write INDEX, then CMD = 2. The slot changes 2 cycles after the CMD
write's handshake, and the next lookup after that uses it. Lookups are never
paused. A packet whose lookup happens in the same cycle as a rule change sees
either the old rule or the new one. Staging registers and INDEX read back; CMD
reads 0. Byte strobes are ignored. The slave handles one write and one read
at a time, and `bresp`/`rresp` are always OKAY.

## Parameters (`fw5g_top`)

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 256 | stream width in bits |
| `N_RULES` | 512 | TCAM slots |
| `HDR_BYTES` | 128 | parser window; must cover the deepest header walk to be accepted |
| `PKT_DEPTH` | 256 | packet buffer, in beats (8 KiB), power of two |
| `DEC_DEPTH` | 32 | decision queue entries, power of two, ≥ 8 |

The default of 512 rules is enough to block one flow out of two for 512
users, each with two flows (1024 concurrent flows), with one exact-match rule
per blocked flow. The firewall keeps no per-flow state, so the number of
flows it forwards has no limit.

## Design choices and limits

The following are choices of this implementation, not fixed by the function:

* **Bus and buffering**: 256-bit AXI4-Stream, an 8 KiB store-then-forward
  buffer with cut-through after the header window, and a one-bit decision
  queue.
* **Outer transport**: only UDP to port 2152 is accepted. GTP-U is carried
  over UDP, so an outer TCP packet is treated as "not 5G user traffic" and
  forwarded.
* **GTP extension headers**: at most two are walked. A third extension header
  makes the packet unrecognised, and it is then forwarded without lookup.
* **Unrecognised packets are forwarded.** To drop them instead, change
  `dec_drop` in `match_action`.
* **Rule priority** is the slot index (lowest wins). The table holds only
  DROP rules.
* **Single port pair**: one input stream and one output stream. Choosing among
  several physical ports, the Ethernet MACs/PHYs, the PCIe path and the host
  software that writes the registers are outside this RTL.
* **Reset** is synchronous, active low, and empties the rule table.
* There are no statistics counters. The `ev_*` outputs pulse once per
  packet (passed, dropped, bypassed, rule hit with its index), so counters can
  be added outside.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/fw_tb_pkg.sv` builds
packets byte by byte from a key and a shape (IPv4 options, GTP optional word,
0–3 extension headers, ICMP/TCP/UDP inner, malformed outer headers). Working
independently of the RTL, it says whether the parser must accept each packet.
It also holds the reference ternary match.

| testbench | what it shows |
|---|---|
| `tb_gtp_parser` | 400 random packets, some truncated and some too deep for the window: verdict, key, and latency exactly 2 cycles |
| `tb_tcam` | random and overlapping wildcard rules; priority, removal, rewrite; 1-cycle latency |
| `tb_match_action` | drop on hit, allow on miss, bypass of non-GTP packets even when the key would hit |
| `tb_deparser` | order and content under random stalls and late decisions; one beat per cycle with no bubbles |
| `tb_sync_fifo` | data order, count, full/empty, push-while-full with pop |
| `tb_rule_ctrl` | AXI4-Lite write orderings, read-back, one TCAM write per command |
| `tb_fw5g_top` | end to end at reduced sizes (32 rules, 16-beat buffer). Random output stalls, rules inserted and removed during traffic, a wildcard rule, packets longer than the buffer. Every output beat is compared with a model, and each of these mechanisms must occur at least once. |
| `tb_fw5g_full` | default sizes: 512 users × 2 flows, with 512 exact rules installed over AXI4-Lite that fill the table. Ten captures of growing size are replayed, from 51 users up to all 512 (1024 flows), each flow in random order. In every capture, each user's first flow must arrive intact and its second flow must be blocked. |

To run one with Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fw5g_full \
    -y rtl -y tb +libext+.sv -Irtl rtl/fw_pkg.sv tb/fw_tb_pkg.sv tb/tb_fw5g_full.sv
./obj_dir/Vtb_fw5g_full
```

The full-size run takes a few seconds. Assertions check the FIFO
overflow/underflow rules, the AXI4-Lite response hold, output-stream
stability under back-pressure and decision-queue room.

What the tests do not cover: timing closure and resource use on a real FPGA,
real captured traffic, and interaction with a real MAC or PCIe host.
