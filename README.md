# 5G network slicing pipeline for a P4/NetFPGA edge-to-core link

Between a 5G edge site and the core network, user traffic travels inside
GTP-U tunnels: every user's IP packet is wrapped in an outer
IP/UDP/GTP header. A plain network card can only see the outer header, so it
cannot tell one user's or one service's traffic from another's. This design
looks through the tunnel and gives each class of 5G traffic (a *slice*) its
own queue with a fixed priority. Slices are then isolated from one another:
a congested slice fills and drops only its own queue, and a slice's delay
depends only on traffic of equal or higher priority.

The RTL is a streaming pipeline on a 256-bit AXI4-Stream bus, as it would sit
in the packet path of a NetFPGA-SUME-style board between the input ports and
the output stage:

```
             +--------------------------------------------------+
 s_axis ---+-+-> deparser: packet FIFO --+--> slicing_core ------+--> m_axis
           | |                           |     slice_demux       |
           | |   gtp_parser -> match_action     32 x pkt_queue   |
           +---> (6-tuple)     (TCAM: queue, drop)  slice_mux    |
             |                  ^ cfg_* rule writes              |
             +--------------------------------------------------+
```

1. **gtp_parser** reads the outer and inner headers and extracts the
   6-tuple that defines a slice.
2. **match_action** looks the 6-tuple up in a TCAM of up to 32 rules and
   returns a queue number (0..31) and a drop flag.
3. **deparser** holds the packet until its decision is known. It writes the
   decision into the packet's metadata and passes the packet on, or
   discards it.
4. **slicing_core** puts the packet in its queue and serves the queues in
   strict priority order, queue 31 first.

## The slice key

A slice is named by six fields of the *inner* (user) traffic:

| field | bits | taken from |
|---|---|---|
| source IPv4 address | 32 | inner IPv4 header |
| destination IPv4 address | 32 | inner IPv4 header |
| source port | 16 | inner TCP/UDP header (0 for other protocols) |
| destination port | 16 | inner TCP/UDP header (0 for other protocols) |
| DSCP | 6 | inner IPv4 header, TOS byte bits 7:2 |
| tunnel endpoint ID (TEID) | 32 | GTP-U header |

They are packed, in this order with the source address at the MSB, into
`slice_key_t` (134 bits) in `rtl/slicing_pkg.sv`.

### How the parser finds them

The parser never stalls the stream. It copies the first `HDR_BEATS` beats
(4 beats = 128 bytes) of each packet into a buffer. When the buffer is full,
or the packet ends sooner, it computes all offsets from the buffered bytes
in one clock:

- Ethernet: EtherType 0x0800 (no VLAN tag).
- Outer IPv4: version 4 and protocol UDP. Its header length (IHL) gives the
  UDP offset.
- Outer UDP: destination port 2152 (GTP-U).
- GTP-U: version 1, PT = 1, message type 0xFF (G-PDU). If any of E/S/PN is
  set, the 4 optional bytes are skipped. If E is set, up to two extension
  headers are followed by their length bytes. This covers the PDU session
  container that 5G puts on every packet.
- Inner IPv4: the IHL gives the TCP/UDP offset; DSCP, the addresses and
  (for TCP/UDP) the ports are read.

If any step fails, or a field lies beyond the bytes actually received, the
packet is marked `is_5g = 0` and gets a zero key. Such packets never match a
rule, so they take the default action (queue 0). With 128 buffered bytes, a
packet with no IP options and a PDU session container needs 82 bytes, which
leaves room for options on both IPv4 headers.

## Decisions travel in the metadata drop byte

Each beat carries a 128-bit `tuser` laid out as the NetFPGA-SUME metadata
record (`sume_metadata_t`). Its 8-bit `drop` field is reused to carry the
slice decision to the slicing core:

| bit | 7:6 | 5:1 | 0 |
|---|---|---|---|
| meaning | 0 | queue ID (31 = highest priority) | discard packet |

`encode_drop_field`, `drop_field_qid` and `drop_field_drop` in the package
are the only places that know this layout.

## The TCAM and its control port

`match_action` holds `ENTRIES` ternary rules. A rule has a value, a mask of
the same 134 bits (1 = must match) and an action (queue, drop flag). All
rules are compared in parallel. If several match, the **lowest index wins**.
If none matches, the action is `DEFAULT_QID` / `DEFAULT_DROP` (queue 0, keep).
The result is registered, one clock after the lookup.

Control software manages the table through a one-clock write port:

| signal | meaning |
|---|---|
| `cfg_we` | write entry `cfg_addr` in this clock |
| `cfg_valid` | 1 inserts/replaces the rule, 0 deletes it |
| `cfg_value`, `cfg_mask` | the ternary key |
| `cfg_action` | `{qid, drop}` |

A bus adapter (AXI-Lite or similar) would sit in front of this port on a
real board. It is not part of this RTL.

## Rejoining packet and decision (deparser)

The parser sees each beat at the moment it enters the deparser's packet
FIFO. A packet's decision exists only after its header beats have been seen:
it takes three more clocks (parser capture, parser output register, TCAM
register). Decisions come out in packet order, into a small decision FIFO.
The deparser's output side pairs the head packet with the head decision:

- drop bit clear: the packet's beats go out unchanged, with the decision
  written into `tuser.drop` on every beat;
- drop bit set: the beats are read out of the FIFO and thrown away, and
  `pipe_drop` pulses once.

Flow control is the subtle part. The parser is a tap and cannot be stalled,
so a decision must never find the decision FIFO full. Up to `IN_FLIGHT = 3`
decisions can be in flight inside the parser and TCAM. The deparser therefore
accepts input only while
`decisions stored + IN_FLIGHT + 1 <= META_DEPTH` and the packet FIFO has room.
Because every beat that can finish a header capture is gated this way, the
decision FIFO cannot overflow; an assertion checks it. The packet FIFO must
hold at least `HDR_BEATS` beats, or a packet could wait for a decision that
needs beats still outside.

## Isolation and priority (slicing_core)

**Demultiplexer** (`slice_demux`). It reads the queue ID from a packet's
first beat, keeps it until `tlast`, and strobes that queue's write enable one
clock later. It never stalls.

**Queues** (`pkt_queue`, 32 of them, `QUEUE_DEPTH` = 64 beats = 2 KiB each).
A queue can never push back on the demultiplexer, or one busy slice would
block all others. Instead it drops whole packets:

- beats are written at a *tentative* write pointer;
- the *committed* pointer moves to the end of the packet when its last beat
  is stored, and only committed beats are visible to the reader;
- if the queue fills part-way through a packet, the tentative pointer rolls
  back to the committed one, the rest of the packet is ignored, and
  `q_drop[q]` pulses.

Packets therefore become visible only when complete, so a packet that has
started can always be read to its end without a gap. A packet longer than the
queue can never be stored.

**Multiplexer** (`slice_mux`). When no packet is being sent, it picks the
highest-numbered queue that holds a packet. It then sends that packet to its
end before choosing again. A lower queue is served only while all higher
ones are empty: strict priority, with no guaranteed share for low queues.
The selection is combinational, so a packet can start in the clock in which
its queue wins. Priority is checked only between packets: a packet on the
wire is never interrupted.

## Interfaces and timing of the top (`p4_slicing_top`)

| port | dir | meaning |
|---|---|---|
| `s_axis_tdata/tkeep/tuser/tlast/tvalid/tready` | in | packets; byte 0 in `tdata[7:0]`, `tkeep` contiguous from bit 0 |
| `m_axis_*` | out | packets with the decision in `tuser.drop` |
| `cfg_*` | in | TCAM rule writes (see above) |
| `match_valid/match_hit/match_rule` | out | one report per TCAM lookup |
| `pipe_drop` | out | a packet was discarded by its rule |
| `q_drop[31:0]` | out | a packet was discarded by a full queue |
| `q_occupancy[31:0][6:0]` | out | committed beats per queue |

The clock is a single `clk` with an active-low asynchronous reset `rst_n`.
The input takes one beat per clock. The slicing core stores each packet whole
before sending it (store-and-forward), so latency grows with packet length.
`s_axis_tready` falls only when the deparser FIFOs are nearly full.

## Parameters

| parameter | default | notes |
|---|---|---|
| `NUM_Q` | 32 | number of queues/QoS classes; part of the scheme |
| `TCAM_ENTRIES` | 32 | rules; 32 users with one rule each is the reference load |
| `QUEUE_DEPTH` | 64 | beats per queue (power of two); design choice |
| `HDR_BEATS` | 4 | header bytes buffered = 32 x this; design choice |
| `PKT_FIFO_DEPTH` | 64 | deparser packet FIFO (power of two, >= `HDR_BEATS`) |
| `META_DEPTH` | 16 | deparser decision FIFO (power of two, >= 4) |

The queue ID is 5 bits, so `NUM_Q` above 32 would need a wider drop-byte field.

## What follows the slicing scheme and what is this design's own

These parts follow the scheme as described:

- the stage order (parser, TCAM match/action, deparser, slicing core with
  demultiplexer, 32 queues and multiplexer);
- the 6-tuple;
- the metadata drop field carrying both the queue choice and the drop
  request;
- 32 queues with queue 31 highest and strict priority;
- rule insertion and deletion by software;
- traffic isolation between queues.

These are this design's own choices, where the description is silent:

- the bus widths and the metadata layout (taken from the NetFPGA-SUME
  platform);
- the bit positions inside the drop byte;
- how the parser walks the headers: IHL handling, GTP options and extension
  headers;
- inner TCP and UDP only. The outer "UDP/TCP" of the header stack is UDP
  only, since GTP-U runs over UDP;
- DSCP taken from the inner header;
- lowest-index-wins among rules, and queue 0 on a miss;
- the rule write port;
- the deparser's FIFO structure, and dropping there rather than in a later
  stage;
- queue sizes, whole-packet tail drop, and packet-boundary (non-preemptive)
  priority.

Not included: the board platform around the pipeline (MACs, input arbiter,
the output stage that follows the multiplexer, PCIe/DMA) and the host
software that writes the rules. IPv6, VLAN tags and GTP signalling messages
are not classified and fall into the default queue.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_pkt_pkg.sv` builds
real Ethernet/IPv4/UDP/GTP-U/IPv4/TCP-or-UDP packets from a field
description, so expected keys and payloads are known independently of the
RTL.

| testbench | what it establishes |
|---|---|
| `tb_gtp_parser` | keys for plain, optioned, extension-header, ICMP, non-GTP, non-IP and truncated packets, plus 200 random ones; exactly 2 clocks from the last header beat to `key_valid` |
| `tb_match_action` | exact, wildcard and overlapping rules, deletion, drop actions and random keys against a software TCAM model; 1-clock latency |
| `tb_deparser` | beat-exact output with the decision stamped in, dropped packets removed, input back-pressure |
| `tb_pkt_queue` | tail drop of whole packets, nothing visible before `tlast`, integrity and counts under concurrent traffic |
| `tb_slice_demux` | queue ID held from the first beat, one-hot strobes |
| `tb_slice_mux` | highest busy queue wins at every packet start; packets never interrupted |
| `tb_slicing_core` | strict order after a held output, drops confined to the overfilled queue, sent = received + dropped |
| `tb_p4_slicing_top` | all defaults: 32 users, 32 rules, one queue each; mapping, congestion with overflow and strict-priority drain, TCAM miss, rule deletion, drop rule |
| `tb_slice_isolation` | all defaults, output at half rate: a flooding low-priority user loses packets while two higher-priority users lose none; the queue-31 user's worst delay stays within 40 clocks (26 measured) against about 175 clocks average for the flooding one |

The full-size end-to-end run takes well under a second. To run any of them
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/slicing_pkg.sv tb/tb_pkt_pkg.sv tb/tb_p4_slicing_top.sv \
  --top-module tb_p4_slicing_top -o sim
./obj_dir/sim
```

Replace the last file and the top-module name to run another testbench.
`tb_pkt_pkg.sv` is needed only by the parser and top testbenches. Stimulus is
applied with blocking assignments on the falling clock edge.

How far to trust it: all files lint cleanly with Verilator `-Wall` (the
remaining warnings are unused bits and constants, and the reset being read by assertions) and elaborate in Yosys/slang. Every
testbench was also checked against a deliberately broken copy of its module
and caught it. Nothing has been run on hardware, timed for an FPGA, or
checked against traffic captured from a real 5G network. At 256 bits the
parser's byte-offset muxes and the 32-way, 134-bit TCAM compare are the likely
critical paths.
