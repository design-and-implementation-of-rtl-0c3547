# DHPON: a passive optical network whose ONUs schedule themselves

This is synthesizable SystemVerilog for the digital part of a Distributed control
Hybrid Passive Optical Network (DHPON). There is one OLT, the central-office end,
and four ONUs, the subscriber ends. They share one fibre tree.

- **Downstream** is a continuous 1.25 Gb/s broadcast from the OLT.
- **Upstream** is time-division multiple access: one ONU at a time sends a
  fixed-size 280-byte burst.

What makes this network unusual is who decides which ONU sends. In an
ordinary EPON the OLT polls the ONUs and hands out grants, which costs a
round trip per decision. Here every ONU sends a short status message on a
separate control wavelength. The message carries its *Q-size*, the number of
upstream packets it has waiting. The passive splitter reflects the sum of all
these messages back to every ONU. Each ONU therefore sees the same table of
Q-sizes at the same moment, applies the same rule (largest Q-size wins), and
knows without being told whether it owns the next slot. The OLT never takes
part in the scheduling. It only receives whatever arrives, with no scheduling
state of its own.

The RTL stops at the word interfaces of the SerDes chips, at the MII/GMII of the
Ethernet PHYs, and at the 1-bit control-channel transceiver. The SerDes,
optics, PHYs, splitter and fibre are not part of it. The testbenches model
them just well enough to run the whole network end to end.

## Clocks and interfaces

| Domain | Frequency | Where | Used for |
|---|---|---|---|
| `pon_clk` | 77.76 MHz | OLT and each ONU | 16-bit SerDes words (1.244 Gb/s) |
| `gmii_clk` | 125 MHz | OLT | 8-bit GMII to the central-office network |
| `mii_clk` | 25 MHz | each ONU | 4-bit MII to the subscriber (100 Mb/s) |
| `ctrl_clk` | 125 MHz | each ONU | 1-bit control channel (125 Mb/s) |

All domains share one asynchronous, active-low reset (`rst_n`). Every
crossing between domains goes through one of three paths:

- a dual-clock FIFO with Gray-coded pointers (`async_fifo`);
- a Gray-coded, registered Q-size;
- a toggle synchronizer for the grant.

The top level, `dhpon_top`, places one `olt` and `NUM_ONU` `onu` instances
side by side. All optical-side signals are brought out as ports:

- `olt_ds_tx_word` and `olt_us_rx_word` for the OLT;
- per ONU (unpacked arrays of `NUM_ONU`):
  - `onu_ds_rx_word`, `onu_us_tx_word`, `onu_us_tx_en`;
  - `onu_ctrl_tx`, `onu_ctrl_rx`;
  - MII, clocks, and a status struct.

The system integrator (or a testbench) connects these through SerDes, optics
and splitter. ONU *n* (n = 1..NUM_ONU) gets ONU-ID *n*, fixed by the generate
loop. A bare `onu` takes its ID on the `onu_id` input.

The status outputs are the packed structs `olt_status_t` and `onu_status_t`
from `dhpon_pkg`. They hold frame, packet, drop, grant and underrun counters
(16 bits, wrapping), plus:

- for the OLT, the ONU-ID and length field of the last upstream packet;
- for each ONU, its current Q-size, the last winner and the downstream bit
  offset it found.

## Line formats

All multi-byte fields are sent most significant byte first. A 16-bit word
carries the earlier byte in bits 15:8.

**Downstream** (OLT to all ONUs, continuous):

```
 ... 5555 5555 | AAAA AAE2 LLLL | payload words ... | 5555 5555 ...
      idle       PSYNC  E2 length  ceil(L/2) words     idle
```

- The header is 3 bytes of AA (PSYNC), the delimiter E2 and a 2-byte
  payload length in bytes.
- The payload is the Ethernet frame as received. An odd last byte is padded
  with 00.
- Idle words are 5555. At least `GAP_WORDS` (2) idle words separate frames.

**Upstream**: one DHPON packet per burst, always 280 bytes = 140 words:

```
 5555 5555 5555 5555 | E2 ID | E LLL LLLL LLLL LLLL | 134 payload words (268 bytes) |
      preamble          delim   EOFB + length (bytes)   data, then 0000 fill
```

- An Ethernet frame of 46 to 1518 bytes is cut into 268-byte pieces, giving 1
  to 6 packets.
- Each packet's length field holds the bytes it carries: 010C for a full one.
- Bit 15 of that field, EOFB, is set on the last piece of a frame.
- The unused end of the last packet is filled with 0000. Between bursts the
  ONU lasers are off, so the line reads 0000.

**Control channel** (each ONU to the splitter and back to every ONU), 64 bits,
MSB first:

```
 55 55 55 55 | E2 | ONU-ID | Q-size (16 bits)
```

## The slot and the distributed decision

This is the part of the design that has to be right everywhere at once, so it
gets the most detail here.

A **slot** is `SLOT_BITS` = 264 control-channel clocks (2.112 µs at 125 MHz).
Inside it, ONU *n* sends its control message in bits (n-1)·64 to n·64-1. With
four ONUs the messages fill bits 0 to 255. The remaining 8 bits are a guard
interval: a message delayed by the splitter path still arrives before the
decision.

```
 bit   0        64       128      192      256   263
       | ONU 1  | ONU 2  | ONU 3  | ONU 4  | guard |   control channel, slot k
                                                  ^ decision (last clock of slot k)
                                                    | burst of the winner, slot k+1 |  upstream data
```

Each ONU's `dba_processor` does the following.

1. **Sample and send its Q-size.** The queue buffer keeps the Q-size
   Gray-coded and registered in the `pon_clk` domain. The DBA processor
   synchronizes it with two flops and samples it once per slot, in the clock
   before its own Q-size field starts. It then shifts out its own message in
   its sub-slot.
2. **Collect the table.** Its `ctrl_rx` input is the shared line, which
   carries the OR of all ONUs' outputs as the splitter delivers it. A 64-bit
   receive shift register recognises any message by its 40-bit
   preamble-plus-delimiter pattern, wherever it lands in the slot. It then
   stores the message's Q-size under the ONU-ID it carries. The ONU's own
   message comes back this way too.
3. **Decide.** In the last clock of the slot, every ONU picks the ONU with
   the largest Q-size in its table:
   - on equal Q-sizes the lowest ONU-ID wins;
   - if every Q-size is 0, nobody sends;
   - the result appears as `winner_id` with a one-clock `decided` pulse.
4. **Grant.** The winner flips `grant_toggle`. A three-flop toggle
   synchronizer turns that flip into a one-clock `grant` pulse in the
   `pon_clk` domain. The queue buffer then sends exactly one 140-word burst
   with `us_tx_en` high: the first word leaves 3 `pon_clk` cycles after the
   grant, and the burst lasts 1.80 µs, which fits in the 2.112 µs slot.

So the messages of slot *k* decide who sends in slot *k+1*.

No ONU ever hears from the OLT about scheduling. Collisions are avoided
because all ONUs hold identical tables and apply a deterministic rule. This
holds only under three conditions, which the deployment must guarantee:

- **Common slot timing.** All ONUs count slots from the same reset on a
  control clock of the same frequency. The RTL has no slot-boundary recovery
  from the line. In the testbench all ONUs share one `ctrl_clk` and leave
  reset together.
- **Short control path.** The delay from any ONU's `ctrl_tx` to every
  `ctrl_rx` must be under 8 bit times, so the last message is complete before
  the decision.
- **Distinct IDs.** Every ONU must have a distinct ID in 1..NUM_ONU. A message
  carrying an unknown ID is ignored.

A grant that finds the queue empty can only follow a disagreement between
the table and the queue, for example after one ONU alone was reset. It is
counted in `empty_grants` and ignored. A grant that arrives while a burst is
still running is held until the burst ends.

## Getting back in step with the bits: `stream_aligner`

A SerDes without word alignment delivers 16-bit words that may start at any
of 16 bit positions, and every upstream burst comes from a different laser
with its own phase. `stream_aligner` keeps the last three received words and,
for each offset *k*, builds the two candidate aligned words from them.

- **While searching**, it looks for the lowest offset at which the older
  candidate equals a marker word and the newer one matches a masked pattern.
  - Downstream (`pon_mac`), the marker is AAAA followed by AAE2.
  - Upstream (`pon_processor`), it is 5555 followed by E2xx, where the low
    byte is the ONU-ID.
- **Once found**, the offset is held, and the aligner outputs the re-aligned
  stream one word per clock, two clocks behind its input.

Downstream the offset normally stays fixed, but it is found again for every
frame. Upstream it is searched for again at every burst.

False markers are rejected by sanity checks on the length:

- Downstream, a length of 0 or over `MAX_BYTES` sends the receiver back to
  searching.
- Upstream, a length of 0 or over 268, or an ONU-ID outside 1..NUM_ONU, does
  the same.

Inside a frame no search runs, so payload that happens to look like a header
is harmless.

## Buffers

Every store-and-forward point uses `data_buffer`, a packet store in two
parts.

- **A payload memory**: a dual-clock FIFO of 2^`BUF_AW` 16-bit words
  (2048 words, 4 KB). Its write side packs 4-, 8- or 16-bit units into
  words, earliest unit in the high bits.
- **A length memory**: a dual-clock FIFO of 2^`LEN_AW` (16) byte counts.

Writing the length *closes* a packet. It flushes a partly filled last word,
padding it with zeros, and makes the packet visible to the reader. A reader
that sees `rd_len_valid` therefore knows the whole packet is already stored.
Reads are first-word-fall-through.

Every writer checks for room **before** it starts a frame and drops the whole
frame if there is none. Nothing is ever written half. The drop is counted.

- `eth_rx_mac` and `pon_mac` need room for a maximum-size frame, or the
  announced length. They also need a free length entry.
- `pon_processor` makes the check at the first packet of each frame, per
  ONU, for a whole maximum-size frame.
- `us_framer` waits until the queue buffer has room for one more whole DHPON
  packet.

The ONU's `queue_buffer` is a single-clock memory for `QPKTS` (16) complete
DHPON packets. Its Q-size counts only packets that are complete and not yet
granted.

## Data paths

**OLT downstream:** GMII → `eth_rx_mac` (8 bit) → `data_buffer` (125 MHz to
77.76 MHz) → `ds_framer` → SerDes.

- `eth_rx_mac` stores every byte while `rx_dv` is high and then writes the
  frame's byte count. Frames longer than `MAX_BYTES` (1526) are cut.
- `ds_framer` sends idle, then for each stored frame the three header words
  and the payload words, then idle again.

**ONU downstream:** SerDes → `pon_mac` → `data_buffer` (77.76 to 25 MHz) →
`eth_tx_if` (MII, 4 bit) → PHY.

- Every ONU forwards every downstream frame. There is no address filtering.
- `eth_tx_if` sends the stored bytes low nibble first, with `tx_en` high for
  exactly 2·length clocks, then holds at least 12 byte times of gap.

**ONU upstream:** PHY → `eth_rx_mac` (MII, 4 bit) → `data_buffer` (25 to
77.76 MHz) → `us_framer` → `queue_buffer` → SerDes, under `dba_processor`.

- `us_framer` takes each stored frame 268 bytes at a time. For each piece it
  writes the six header words, then the payload words and the fill: always
  140 words per packet.

**OLT upstream:** SerDes → `pon_processor` → one `data_buffer` per ONU
(77.76 to 125 MHz) → `buffer_mux` → `eth_tx_if` (GMII) → PHY.

- `pon_processor` aligns each burst and reads the ONU-ID and the
  EOFB/length word. It writes the packet's payload words, but not the fill,
  into that ONU's buffer and adds the length to that ONU's running total.
- On EOFB it writes the total as the frame's length, which closes the
  rebuilt frame.
- Because packets of different ONUs may interleave freely, each ONU has its
  own running total and its own buffer.
- `buffer_mux` serves the buffers round-robin, starting after the one it
  served last. It holds its choice for a whole frame, until the transmitter
  pops the frame's length.

The bytes on MII/GMII are the Ethernet frame exactly as it entered the
network. No preamble or FCS is added or removed: either is carried if the
PHY side supplies it.

## Files

| File | Purpose |
|---|---|
| `rtl/dhpon_pkg.sv` | Constants of the line formats, status structs, `words_of()` |
| `rtl/dhpon_top.sv` | One OLT plus `NUM_ONU` ONUs, optical side as ports |
| `rtl/olt.sv`, `rtl/onu.sv` | The two FPGA designs |
| `rtl/eth_rx_mac.sv` | GMII/MII receive: frame into a buffer, then its length |
| `rtl/data_buffer.sv` | Dual-clock packet store (payload and length memories) |
| `rtl/async_fifo.sv` | Dual-clock FIFO, Gray pointers, first-word-fall-through |
| `rtl/ds_framer.sv` | OLT downstream framer |
| `rtl/stream_aligner.sv` | 16-offset bit/word aligner |
| `rtl/pon_mac.sv` | ONU downstream receiver |
| `rtl/eth_tx_if.sv` | MII/GMII transmit from a buffer |
| `rtl/us_framer.sv` | ONU upstream framer (segmentation, header, EOFB) |
| `rtl/queue_buffer.sv` | ONU packet queue, Q-size, one burst per grant |
| `rtl/dba_processor.sv` | Control messages, Q-size table, slot decision |
| `rtl/toggle_sync.sv` | Grant crossing from control clock to SerDes clock |
| `rtl/pon_processor.sv` | OLT upstream receiver and frame reassembly |
| `rtl/buffer_mux.sv` | OLT round-robin selection of ONU buffers |

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_ONU` | 4 | ONUs (control messages per slot, OLT buffers) |
| `BUF_AW` | 11 | Payload memories hold 2^BUF_AW 16-bit words |
| `LEN_AW` | 4 | Length memories hold 2^LEN_AW frames |
| `QPKTS` | 16 | Queue buffer depth in DHPON packets |
| `SLOT_BITS` | 264 | Slot length in control clocks; must be ≥ 64·NUM_ONU + control path delay |
| `MAX_BYTES` | 1526 | Longest frame accepted: a 1518-byte Ethernet frame plus the 8 bytes of preamble and start delimiter, which are carried with it |

Only the 4, the 268/280-byte packet, the 1518-byte frame and the header
values are fixed by the original description. The memory sizes are chosen
here.

With more than four ONUs, `SLOT_BITS` must grow, and with it the slot time:
one burst still takes 1.80 µs, so the extra length only adds idle time.

## Where this design departs from, or goes beyond, the original description

- **Slot length.** The original gives a 2 µs slot, a 125 Mb/s control
  channel and four 8-byte messages per slot. 2 µs holds only 250 control
  bits, fewer than four 64-bit messages. The slot here is 264 bits
  (2.112 µs): the four messages plus an 8-bit guard, which matches the short
  decision field drawn at the end of each slot. The 280-byte burst (1.80 µs)
  fits in either.
- **Choices the original leaves open:**
  - the tie rule (lowest ONU-ID);
  - the all-empty rule (nobody sends);
  - the control preamble value (55) and delimiter (E2);
  - the upstream fill (0000).
- **Taken from the original's measured waveforms** rather than its text:
  - the downstream idle word 5555;
  - MII nibble order (low nibble first);
  - byte order within words (first byte in the high half);
  - frames carried with their preamble and SFD (a 1500-byte test frame
    travels as 1512 bytes, 5555 .. 55D5 first).
- **Overflow handling** is this design's own: check for room, then drop
  whole frames.
- **Aligner.** The original describes shifting through two 16-bit
  registers. The aligner here keeps three, so that the two-word marker is
  compared in one clock.
- **Slot synchronisation between ONUs** is not described in the original,
  and none is built. The ONUs must share reset and control clock (see
  above).
- **Downstream header.** The original's text also names a 6-byte
  "preamble" for the downstream header once. The 3-byte PSYNC
  (6-byte header) form it gives elsewhere, and draws, is the one built.
- **The original prototype** linked its OLT and ONU boards in continuous
  mode, because its OLT board was an adapted ONU board. The burst-mode
  behaviour here (a dark line between bursts, realignment at every burst)
  is what the design calls for, and is simulated rather than proven on
  optics. The OLT receiver also accepts a line that idles at 5555 between
  bursts, as that prototype's did: it syncs only on preamble followed by
  the E2 delimiter.
- **Outside the RTL:**
  - the scrambler of the SerDes chip (its polynomial is not given);
  - the SerDes itself, optics, PHYs, splitter and fibre;
  - Ethernet address filtering;
  - FCS checking;
  - distance ranging (none is needed while the control path is short).

## Capacity

The upstream link carries at most one 268-byte payload per 2.112 µs slot,
about 1.0 Gb/s shared by all ONUs.

- **One ONU with 100 Mb/s on its MII.** Minimum-size (64-byte) frames arrive
  every 6.72 µs, counting preamble and gap. Each needs one slot. The ONU is
  therefore served about three times faster than it fills.
- **Four ONUs all sending minimum-size frames at 100 Mb/s** would need one
  slot every 1.68 µs. That does *not* fit: their queues would grow until
  frames are dropped at the MII.
- **Downstream.** The 1.244 Gb/s line outruns one GMII at full rate. Each
  ONU's MII (100 Mb/s) empties its buffer faster than a 100 Mb/s stream fills
  it, so a 100 Mb/s downstream stream of any frame sizes runs indefinitely. A
  1 Gb/s burst aimed at one 100 Mb/s port is held only as far as the 4 KB
  buffer allows.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>`, stops itself with a watchdog, and works
out expected values on its own (byte patterns rebuilt from a formula, its
own parsers for the line formats).

| Testbench | What it checks |
|---|---|
| `tb_eth_rx_mac` | Frames at 4 and 8 bits stored with the right lengths; drop when full; cut at MAX_BYTES |
| `tb_data_buffer` | 4/8/16-bit packing, odd lengths, unrelated clocks, first-word-fall-through |
| `tb_ds_framer` | Header words, payload, idle gaps, order |
| `tb_pon_mac` | Every bit offset, false header inside a payload, drop when full |
| `tb_eth_tx_if` | MII/GMII timing (exact enable length, gap), data, length pop |
| `tb_us_framer` | Segmentation of 46..1518-byte frames, headers, EOFB, fill, queue back-pressure |
| `tb_queue_buffer` | Q-size (binary and Gray), 140-word bursts, 3-clock grant latency, writes during a burst, empty grant, full queue |
| `tb_dba_processor` | Four processors on an OR'd line: rule, ties, all-empty, slot length, message format |
| `tb_pon_processor` | Interleaved multi-packet frames of four ONUs at different bit offsets, dark and 5555 idle between bursts, unknown ID, drop |
| `tb_buffer_mux` | Round-robin order, frame integrity, skipping empty buffers |
| `tb_olt` | GMII to downstream line; interleaved upstream bursts to GMII |
| `tb_onu` | Stays dark while another ONU has more queued, then drains; downstream to MII |
| `tb_dhpon_top` | The whole network at default parameters (below) |
| `tb_smartbits_load` | Traffic-generator load: 1000 random-size frames (64..1518 bytes) each way at 100 Mb/s through the default network |
| `tb_vlc_stream` | Constant 8 Mb/s video-like stream each way through the default network: content, rate, delay and delay spread |

`tb_dhpon_top` runs the complete network with every parameter at its default.

- **Downstream:** GMII frames of 46 to 1518 bytes, broadcast to all four
  ONUs. Each ONU sees the line at a different bit offset.
- **Upstream:** at the same time, six frames of 46 to 1518 bytes into each
  ONU's MII. The MII clocks are slightly different.
- **Line models:**
  - upstream bursts are gated by their enables, shifted and OR'd;
  - the control channel is OR'd with a 3-bit delay.

It checks every frame at every output and that no two bursts ever overlap. It
also checks each slot's decision against the rule, computed independently
from the Q-size table, and that all four ONUs agree. It counts the mechanisms
exercised. A typical run has:

- 72 bursts, each exactly 140 words;
- 16 multi-packet frames;
- about 190 slots, of which about 120 are idle and 13 are ties;
- 18 grants per ONU;
- 18 switches between ONUs on the GMII.

`tb_smartbits_load` models a traffic-generator test on the default network.

- It sends 1000 frames of random size (64 to 1518 bytes, fixed seed) at a
  100 Mb/s line rate both ways: into the OLT's GMII, and into ONU 1's MII.
- It checks every frame at every ONU's MII and at the OLT's GMII.
- It checks the offered rate and that nothing is dropped.
- It checks that only ONU 1 is ever granted, once per burst.

All 1000 frames arrive intact each way, in about 3450 upstream packets. The
original hardware, measured over a million frames, delivered 99.94 %
downstream and 99.76 % upstream; the modelled line here has no bit errors. The
run takes about 20 s of wall time. Longer runs differ only in count: no
buffer grows with the number of frames.

`tb_vlc_stream` sends an 8 Mb/s stream both ways at once: 40 frames of 1358
bytes, one every 1.358 ms. The stream goes into the OLT's GMII and into
ONU 2's MII. Every frame arrives intact. The delay is measured from the end of
a frame's input to the end of its output:

- downstream, about 117.7 µs, nearly all of it the 108.6 µs the frame takes
  on the 100 Mb/s MII;
- upstream, 26.6 to 28.6 µs.

The spread stays within 2 µs.

Every testbench has also been run against a deliberately broken copy of its
block, and it fails against each. Examples of the breaks:

- ties going to the highest ID;
- bursts one word short;
- EOFB never set;
- round-robin replaced by fixed priority.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/dhpon_pkg.sv tb/tb_dhpon_top.sv \
  --top-module tb_dhpon_top -o sim
./obj_dir/sim
```

Replace `tb_dhpon_top` with any other testbench name. `tb_pkt_source.sv` is a
helper, not a test. The end-to-end run takes well under a minute.

Verilator `-Wall` lint leaves only style warnings:

- unconnected optional outputs;
- a few unused status bits;
- `rst_n` used both as asynchronous reset and in the `disable iff` of the FIFO
  assertions.

The assertions (no write when full, no read when empty) sit under
`ifndef SYNTHESIS`.
