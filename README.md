# ONU data path for a distributed-control hybrid PON

This is the data path of an Optical Network Unit (ONU), the subscriber end of a
passive optical network (PON). It sits between a 100 Mb/s Ethernet PHY (MII,
4 bits at 25 MHz) and the PON transceiver (16 bits at 77.76 MHz).

The network it is built for is a *distributed-control hybrid PON*. Wavelength
multiplexing splits the fibre plant into sub-PONs, and the ONUs inside one
sub-PON share its upstream wavelength in time slots. The slots are not handed
out by a central scheduler at the line terminal (OLT), as in IPACT polling.
Instead, every ONU broadcasts its queue size on a separate low-rate control
wavelength. Every ONU runs the same bandwidth-allocation (DBA) algorithm on
those reports and works out its own transmission times. No central
scheduler has to poll the ONUs one by one.

The RTL here is the part of the ONU that such a scheme needs on the data path:

* **Upstream:** cut Ethernet packets into fixed 280-byte slots and queue the
  slots. Report how many complete slots are waiting, and send exactly one slot
  per grant from the DBA processor.
* **Downstream:** find frames in the received bit stream and keep only those
  addressed to this ONU. Strip their header and play them out on MII.

The DBA processor itself is not part of this RTL (see *Outside the RTL*).

## Upstream slot format

Every slot is 280 bytes, i.e. 140 words of 16 bits, and the first byte is
always in the upper half of a word:

| word    | content                                                             |
|---------|---------------------------------------------------------------------|
| 0-3     | preamble `16'h5555`                                                 |
| 4       | `{8'hE2, onu_id}`: delimiter and ONU-ID                             |
| 5       | payload length: `16'h010C` (268) if more of the packet follows, else `16'h8000 \| bytes` |
| 6-139   | 268 payload bytes; after the packet's last byte, idle `16'hAAAA`    |

So a packet of L bytes takes ceil(L/268) slots. A 60-byte packet takes one
slot, a 1500-byte packet takes six. Bit 15 of the length word marks the
packet's last slot, and the 15 bits below it give the bytes that slot carries.
The line terminal rebuilds the packet from this. A packet of exactly 268·k
bytes also gets the flag in its k-th slot (`16'h810C`).

"Bytes" here means everything the PHY delivers while RX_DV is high, Ethernet
preamble and SFD included. The MAC does not interpret the frame.

## Upstream path

```
MII (25 MHz)                         |  PON side (77.76 MHz)
rx_dv,rxd -> eth_mac_rx -> buffer0_up ==> bridge -> reorder_buffer -> framer -> buffer3 -> dba_control -> up_data
                    \---> len_buffer (buffer1) ==> bridge
                     \--> len_buffer (buffer2) ==> framer
                                                     buffer3.slot_count -> DBA processor -> dba_pulse
```

* **eth_mac_rx** forwards each nibble to buffer0 and counts it. When RX_DV
  falls, it pads the packet with `4'h0` nibbles to a whole 16-bit word (at
  most three clocks, inside the inter-frame gap). It then writes the byte
  length to buffer1 and buffer2 in the same clock. The MAC samples `full` when
  a packet starts; if it is high, the whole packet is dropped and counted in
  `up_drops`. `full` is high when buffer0 has less free space than one
  maximum packet, or when a length FIFO is full. A packet that has started is
  never cut. A packet longer than `MAX_PKT_BYTES` (1536) is truncated there.
* **buffer0_up** is the clock and width converter: 4 bits in at 25 MHz,
  16 bits out at 77.76 MHz, 8192 nibbles deep. It behaves like an
  asymmetric dual-port block RAM, so the *first* nibble lands in the *low*
  bits. Nibbles 1,2,3,4 therefore read out as `16'h4321`. The bridge starts
  only on a complete packet, so buffer0 must hold one packet being drained
  and the next one arriving after a 12-byte gap. Half the depth would drop
  every second long packet of a back-to-back stream.
* **bridge** waits for a length in buffer1, which means the whole packet is
  in buffer0. It then holds buffer0's read enable for ceil(L/2) words. The
  word goes straight from buffer0's output into the reorder buffer.
* **reorder_buffer** ("buffer") swaps the four nibbles back (`16'h4321` to
  `16'h1234`) and queues the words (1024 deep).
* **framer** takes the same length from buffer2 and writes the slots above
  into buffer3, one word per clock. It waits while the reorder buffer is empty
  or buffer3 is full. With no stalls, a 1500-byte packet takes exactly
  6 × 140 = 840 clocks.
* **buffer3** queues slot words (1024 deep, seven slots). `slot_count`
  counts the complete slots it holds. That count is the queue report for the
  DBA processor.
* **dba_control** serves each `dba_pulse`. If a complete slot is stored and
  none is being sent, it reads 140 words from buffer3 on 140 consecutive
  clocks. They go out on `up_data` with `up_valid`, and the first word appears
  two clocks after the clock that samples the grant. The slot count then
  drops by one. Grants that find no slot, or arrive during a slot, are
  ignored and counted in `lost_grants`.

Back-pressure runs backwards along the chain. Without grants, buffer3 fills
and the framer waits (`up_stall`). Then the reorder buffer fills and the
bridge waits. Then buffer0 fills, and the MAC starts dropping whole packets.
Nothing is ever overwritten.

## Downstream frame format and path

```
... 5555 5555 | 55E2 | length | MAC[47:32] MAC[31:16] MAC[15:0] | data ... | 5555 ...
     PSYNC      PSYNC byte      bytes after the length field, address included
                + delimiter
```

```
dn_data (77.76 MHz) -> corrector -> pon_mac -> buffer0_dn ==> outcontrol -> tx_en, txd (25 MHz)
                                          \--> len_buffer ==> outcontrol
```

* **corrector** handles lost PSYNC bits, which leave the delimiter anywhere
  inside a word. The block keeps a 32-bit window of the last two words and
  looks for `16'h55E2` at all 16 bit offsets, lowest first. When it finds it,
  it re-aligns every following word to that offset. A shift of 16 bits or
  more is the same word alignment. The offset can change only while the PON
  MAC is between packets (`hunt`), so payload bits cannot re-align a packet in
  flight. Latency is one clock.
* **pon_mac** waits for `16'h55E2` and reads the length. It skips the packet
  if buffer0 lacks room for it or the length FIFO is full. Otherwise it writes
  the words into buffer0 as they arrive and compares the first three with
  `my_mac`. On a mismatch it rewinds buffer0's write pointer and skips the
  rest of the packet. On a match it writes the whole packet and commits it
  with the last word. It then reports the length to outcontrol. `dn_ok` and
  `dn_drop` count the two outcomes.
* **buffer0_dn** converts 16 bits at 77.76 MHz to 4 bits at 25 MHz, 1024
  words deep. The reader sees only committed words. Nibbles leave most
  significant first (`16'h1234` goes out as 1,2,3,4), so the output
  reproduces the 16-bit words in order.
* **outcontrol** adds every reported length to a count of nibbles still to
  send. While the count is non-zero it reads one nibble per clock and drives
  it on TXD with TX_EN, both registered. A length that arrives while a packet
  is still leaving is added to the count. Packets that follow each other
  closely therefore leave in one TX_EN burst, with no gap between them.

## Clock domains

There are three clocks: `clk` (77.76 MHz, PON side), `mii_rx_clk` and
`mii_tx_clk` (25 MHz from the PHY). They may be fully asynchronous. Every
crossing goes through a FIFO: buffer0_up, buffer0_dn and the three
`len_buffer` instances. In each FIFO the pointers are Gray coded, pass
through two flip-flops (`ptr_sync`), and carry one wrap bit, so every
location is usable. A word written on one side is visible on the other
after about three to four clocks of the reading side.

All reads use a first-word-fall-through register in front of a synchronously
read memory. A block RAM can hold these memories, and a word can leave every
clock. Each FIFO therefore holds one word more than its memory.

Reset `rst` is asynchronous and active high. Hold it for several cycles of
the slowest clock.

## Top-level interface (`onu_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `mii_rx_clk`, `mii_tx_clk`, `rst` | in | 1 | clocks and reset |
| `onu_id` | in | 8 | ONU-ID put in every slot header |
| `my_mac` | in | 48 | address accepted downstream |
| `rx_dv`, `rxd` | in | 1, 4 | MII receive from the PHY |
| `dba_pulse` | in | 1 | grant: send one slot |
| `slot_count` | out | 8 | complete slots waiting (queue report to the DBA) |
| `up_data`, `up_valid` | out | 16, 1 | upstream slot words to the SerDes |
| `up_busy`, `up_stall` | out | 1 | a slot is being sent; buffer3 full |
| `up_drops`, `lost_grants` | out | 16 | packets dropped on full; grants ignored |
| `dn_valid`, `dn_data` | in | 1, 16 | downstream words from the SerDes |
| `tx_en`, `txd` | out | 1, 4 | MII transmit to the PHY |
| `dn_ok`, `dn_drop` | out | 16 | downstream packets accepted / discarded |
| `dn_locked`, `dn_shift` | out | 1, 4 | corrector has locked; bit offset it applies |

The sizes are module parameters with these defaults: `MAX_PKT_BYTES`,
buffer0 depth `NIB_AW` and its drop threshold `RESERVE_NIB`, and the FIFO
depths `AW`. The slot format constants are in `onu_pkg`.

## Interpretations and departures

The original design was specified in prose and waveforms. Where these
disagreed or said nothing, this RTL chose as follows:

* **Payload per slot.** The length word `16'h010C` is described as a
  "280-byte payload", but 0x10C is 268. The same text starts a new header
  after 268 data bytes. Built: 12 header bytes plus 268 payload bytes in a
  280-byte slot.
* **Slot read time.** DBAcontrol is described as holding the read enable for
  "280 clocks". The path moves 2 bytes per clock, and the reference waveform
  shows a byte counter falling by 2 per clock. Built: 140 clocks per slot.
* **Which address is checked.** The prose says the *source* address is
  checked. The reference test frame puts the ONU's address as the first six
  bytes after the length, and that address is what appears first at the MII
  output. Built: those six bytes are compared with `my_mac`, and the output
  starts with them.
* **Odd lengths.** Only even packet lengths were considered originally.
  Upstream, an odd length is carried exactly in the slot header and the pad
  byte is dropped there. Downstream, outcontrol sends whole words, so an
  odd-length packet leaves with one extra pad byte.
* **Full and empty flags.** The original compared raw RAM addresses across
  the two clock domains and used a one-location gap. This RTL uses Gray-coded
  pointers with a wrap bit instead.
* **Packet drop.** "Packets are dropped while full is high" is implemented
  as a whole-packet decision made at the first nibble.
* **Own choices, where nothing was specified:**
  - buffer depths;
  - the rewind/commit mechanism in downstream buffer0;
  - skipping packets that do not fit;
  - ignoring grants that cannot be served;
  - nibble order on the downstream MII side;
  - the corrector's `hunt` gate.
* **Downstream line rate.** The 16-bit, 77.76 MHz port carries 1.244 Gb/s.
  That matches the 1.25 Gb/s upstream PON rate. The downstream PON rate is
  given as 2.5 Gb/s, yet the downstream input was also specified as 16 bits
  at 77.76 MHz, and that is what is built. A 2.5 Gb/s deserialiser would need
  a 32-bit or 155.52 MHz front end.

## Outside the RTL

The following parts are not included. Their signals are top-level ports.

* **DBA processor:** the distributed slot computation. Only its concept
  exists; it consumes `slot_count` and produces `dba_pulse`.
* **Ethernet PHY**
* **PON SerDes**
* **Optics:** 1490/1310/1550 nm.
* **OLT:** the line terminal.

Nor is the low-rate control channel that carries the queue reports between
ONUs included.

## Verification

Every block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one ends by printing `TB_RESULT checks=N failures=M` and has a watchdog. The
references are computed independently in the testbench: queues of expected
words, the slot format rebuilt from its rules, and bit streams built bit by
bit for the corrector.

`tb_onu_top` runs the whole ONU at its default sizes. Upstream, it sends
packets of 60, 1500, 7, 268 and 1460 bytes over MII. It grants slots from a
DBA model, parses every slot and rebuilds and compares the packets. It then
withholds grants while eight 1500-byte packets arrive, until buffer3 fills
and the MAC drops packets. Downstream, it sends frames for this ONU and for
another one, in a bit stream whose alignment changes between frames. It
checks the MII output nibble by nibble. It also counts that each of these
occurred: multi-slot packet, last-slot flag, idle fill, buffer3 full, drop on
full, lost grant, re-alignment, address mismatch, merged TX_EN burst.

`tb_onu_stream` sends 40 packets back to back at the full 100 Mb/s, with
a 12-byte gap between them. They are 1455 to 1494 bytes long, with a 60-byte
packet every fifth. Slots are granted as soon as they are reported. The test
checks every slot, and checks that nothing is dropped and buffer3 never
fills. It also checks that each packet's last slot leaves within 2000 PON
clocks of the packet's end.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_onu_top \
    -y rtl -y tb +libext+.sv rtl/onu_pkg.sv tb/tb_onu_top.sv
./obj_dir/Vtb_onu_top
```

Replace `tb_onu_top` with any other testbench name. The full-size top test
takes well under a minute. The simulator has two states, so everything that
is read is reset.

## Files

* `rtl/onu_pkg.sv`: slot and frame constants.
* `rtl/onu_top.sv`: the top level.
* Upstream: `rtl/eth_mac_rx.sv`, `rtl/buffer0_up.sv`, `rtl/len_buffer.sv`,
  `rtl/bridge.sv`, `rtl/reorder_buffer.sv`, `rtl/framer.sv`,
  `rtl/buffer3.sv`, `rtl/dba_control.sv`.
* Downstream: `rtl/corrector.sv`, `rtl/pon_mac.sv`, `rtl/buffer0_dn.sv`,
  `rtl/outcontrol.sv`.
* Helpers: `rtl/sync_fifo.sv` (single-clock FIFO) and `rtl/ptr_sync.sv`
  (pointer synchroniser).
* `tb/`: one testbench per block, plus `tb_onu_top.sv` and `tb_onu_stream.sv`.
