# EthController: a small Ethernet link between a PC and an FPGA

Moving data between a PC and an FPGA over Ethernet usually means putting a
UDP/IP or TCP/IP stack into the FPGA. This core avoids that. It talks to the
board's Ethernet PHY directly over the 100 Mbit/s MII bus (4 bits per 25 MHz
clock) and uses a small protocol of its own at the data-link layer. The PC
reaches it with raw sockets. Every data packet carries a number and is
confirmed by an ACK packet. The sender keeps a copy of the packet and sends it
again if no ACK arrives within 1 ms. The result is a reliable stop-and-wait
link that needs a few hundred flip-flops and one block RAM.

The design follows the EthController IP core described in the paper
"Enhancing FPGA I/O Communication Using Web Services". That paper also
describes the PC software: a C raw-socket program and a Java web front end.
Only the FPGA core is here. Where the paper leaves details open, this RTL
makes its own choices. They are listed in
[Choices and departures](#choices-and-departures).

## Structure

```
            rx clock domain                      tx clock domain
 PHY rx  -> eth_receive --(32-bit items)--> send_fifo --> eth_send -> PHY tx
 (MII)      |  crc32_d8                      (dual-clock)   |  crc32_d8
            v                                               |  resend_fifo
       16-bit words to user logic          user words  ---->+
```

| file | role |
|---|---|
| `rtl/eth_controller.sv` | top level: wires the three blocks; one reset synchronizer per clock domain |
| `rtl/eth_receive.sv` | parses incoming frames nibble by nibble; outputs payload words; queues ACK work |
| `rtl/send_fifo.sv` | gray-code dual-clock FIFO, 32 bits wide, first-word-fall-through read |
| `rtl/eth_send.sv` | builds and sends ACK and DATA frames; inter-frame gap, collision hold-off, timeout and resend |
| `rtl/resend_fifo.sv` | 512 x 16 payload store of the DATA packet in flight, read by address so it can be replayed |
| `rtl/crc32_d8.sv` | IEEE 802.3 CRC-32, one byte per clock enable |
| `rtl/rst_sync.sv` | asynchronous-assert, synchronous-release reset |
| `rtl/eth_pkg.sv` | frame constants, type codes, FIFO item type, CRC step function |

The receive and transmit clocks come from the PHY. Both run at 25 MHz, but
they are unrelated, so `send_fifo` is the only path between the two halves.

## The frame

Frames on the wire have the Ethernet preamble, delimiter and FCS. The body
between them is the protocol's own: it has no MAC addresses and no EtherType.

| bytes | field | value |
|---|---|---|
| 7 | preamble | `55h` each |
| 1 | start-of-frame delimiter | `D5h` |
| 4 | type | `44415441h` ("DATA") or `41434B20h` ("ACK ") |
| 2 | packet number | most significant byte first |
| 2 | payload length in bytes | 0 in ACK frames |
| n | payload | 16-bit words, high byte first |
| 0..52 | zero padding | makes the data field at least 60 bytes |
| 4 | FCS | standard 802.3 CRC-32, complemented, low byte first |

Each byte goes on the MII low nibble first. Because of the padding, the
smallest frame is 64 bytes from the type field to the FCS, the Ethernet
minimum. An ACK frame is always this minimum: 72 bytes with the preamble, or
144 clocks.

## Receive path (`eth_receive`)

The receiver has no frame buffer. It decides what each byte means as the byte
arrives.

1. **Preamble.** While `rx_valid_i` is high, it counts `5h` nibbles until it
   sees `Dh`. At least 15 fives must come first: seven preamble bytes and the
   low half of the delimiter. Anything else drops the frame until
   `rx_valid_i` falls.
2. **Header.** It assembles bytes from nibble pairs. The first four bytes
   must be one of the two type codes; an unknown type drops the frame at once.
   The next four bytes give the packet number and the length.
3. **Payload.** For a DATA frame, each pair of payload bytes goes out as
   `usr_data_o` with a one-clock `usr_valid_o`, one word every 4 clocks. An
   odd last byte goes out alone in bits 15:8.
4. **CRC.** Every byte after the delimiter, the FCS included, passes through
   `crc32_d8`. The check output of that module is the CRC register minus the
   802.3 residue, so it is zero exactly when the frame is intact.
5. **Verdict.** When `rx_valid_i` falls, the frame is accepted only if all
   three of these hold:
   * it ended on a byte boundary;
   * it held at least header + length + 4 bytes;
   * the check output is zero.

   An accepted DATA frame writes a *send-ACK* item with its number into the
   FIFO. An accepted ACK frame from the PC writes a *peer-ACK* item.

The payload words leave before the verdict is known. `pkt_end_o` pulses at
the end of each DATA packet, with `pkt_ok_o` giving the verdict and
`pkt_nr_o` the packet number. User logic that must not use a corrupt packet
should hold its words until then. The core does not detect duplicates. If the
PC resends a packet because its ACK was lost, the words come out twice under
the same packet number, so user logic can filter them by number.

## Transmit path and the acknowledgement protocol (`eth_send`)

This part is the heart of the design.

**Frame generation.** One byte counter runs over the whole frame. A
multiplexer picks the byte for the current position: preamble, delimiter,
type, number, length, payload word from the resend buffer, zero padding, or
one FCS byte. On the first clock of a byte, the byte is loaded into a shift
register and its low nibble is sent; on the second clock, the high nibble is
sent. The CRC instance folds in each byte of the data field as the byte is
loaded. Its complemented value is therefore complete when the FCS bytes are
due. The resend buffer has a synchronous read port. Its address is driven
one clock ahead, from the counter value of the following byte.

**What may start a frame.** A single counter, `since_q`, counts clocks since
the end of the last frame of either kind. It saturates at the timeout. Any
frame needs:

* `since_q >= IFG_CLKS` (24 clocks = 960 ns, the 802.3 gap). Back-to-back
  frames end up 25 idle clocks apart.
* `col_i` low, sampled through a two-flop synchronizer.

A DATA frame also needs the previous DATA packet to have been acknowledged.
ACK frames do not wait for this, because ACK frames are never acknowledged.

**Order of service.** When idle, `eth_send` looks at the FIFO first:

* A *send-ACK* item starts an ACK frame as soon as the gap and the collision
  input allow. If `ack_en_i` is low, the item is dropped instead.
* A *peer-ACK* item whose number matches the DATA packet in flight releases
  that packet. The buffer is cleared, the packet number advances, and the user
  port opens again. A peer-ACK with any other number is ignored.

Only when the FIFO is empty does it start a new DATA frame, or resend the
packet in flight once `since_q` reaches `ACK_TIMEOUT_CLKS` (25000 clocks =
1 ms).

**Loading a packet.** While no packet is held, `usr_ready_o` is high and
words are written into `resend_fifo`. A packet ends at `usr_last_i` or when
the buffer holds 512 words (1024 bytes). The packet is then sent, and it stays
in the buffer until its ACK arrives. It is resent as often as the timeout
expires; there is no retry limit in the core. DATA packet numbers start at 0
after reset.

Because the timer restarts after every frame, an ACK frame sent while a DATA
packet waits also restarts that packet's 1 ms timeout. With the PC
confirming every packet, this only delays a resend.

**ACK switch.** `ack_en_i` is meant for a board switch. Turning it off stops
all ACK frames, which lets the PC's resend logic be tested. It resets to
"enabled" and is synchronized into the tx clock domain.

## Interfaces

All MII-side ports keep the names of the PHY connection: `reset_i`,
`rx_clk_i`, `rx_valid_i`, `rx_data_i[3:0]`, `tx_clk_i`, `tx_en_o`,
`tx_data_o[3:0]` and `col_i`. `reset_i` is asynchronous and active high.

**User side, receive** (`rx_clk_i` domain):

* `rx_usr_data_o[15:0]` and `rx_usr_valid_o`: the payload words.
* `rx_pkt_end_o`, `rx_pkt_ok_o` and `rx_pkt_nr_o[15:0]`: the end of each
  DATA packet, its verdict and its number.
* `rx_fifo_ovf_o`: pulses if an ACK item was lost to a full FIFO. The FIFO
  holds 16 items; this cannot happen while the PC waits for each ACK.

**User side, transmit** (`tx_clk_i` domain):

* `tx_usr_data_i[15:0]`, `tx_usr_valid_i`, `tx_usr_last_i` and
  `tx_usr_ready_o`: a valid/ready stream. A word transfers on a clock where
  both valid and ready are high.
* `tx_wait_ack_o`: a DATA packet has been sent and not yet confirmed.
* `tx_seq_o[15:0]`: the number of the current or next DATA packet.
* `tx_resend_o`: pulses on every timeout resend.

**Timing:**

* A word leaves the receiver 1 clock after its last nibble.
* An ACK item reaches the FIFO 2 clocks after `rx_valid_i` falls. It then
  crosses the FIFO in about 3 tx clocks.
* Consecutive frames are separated by at least 24 idle clocks; the design
  leaves 25 when frames go back to back.

Top-level parameters, all with their default values:

| parameter | default | meaning |
|---|---|---|
| `IFG_CLKS` | 24 | minimum idle clocks between frames (960 ns at 25 MHz) |
| `ACK_TIMEOUT_CLKS` | 25000 | clocks before an unacknowledged DATA packet is resent (1 ms) |
| `PAY_AW` | 9 | resend buffer of 2^9 words, so DATA payloads of up to 1024 bytes |
| `FIFO_AW` | 4 | clock-crossing FIFO of 16 items |
| `PRE_MIN_NIBBLES` | 15 | preamble nibbles required before the delimiter |

## Performance and size

The paper measured a continuous PC-to-FPGA transfer at about 2936 packets/s.
The frames were about 1032 bytes: the 8-byte header plus 1024 payload bytes.
That is about 2.9 MB/s, and the limit is the stop-and-wait protocol, not the
hardware. One such frame takes 2088 clocks (83.5 us) on the wire, and the ACK
frame takes 144 clocks. The core could therefore take a packet every ~90 us.
The measured rate, one packet every 340 us, is set by the PC's round trip.

Yosys coarse synthesis of this RTL gives about 410 flip-flop bits and
8.5 kbit of memory. Of that memory, 8 kbit is the resend buffer, which fits
one 18 kbit block RAM, and 512 bits is the FIFO. The paper reports 349 slice
registers and one RAMB16 on a Spartan-6 LX45.

## Choices and departures

The structure, the frame fields and their sizes, and the following behaviour
are the paper's:

* nibble-wide processing and the 16-bit word output;
* the on-the-fly CRC, the CRC-is-zero check and the zero padding;
* the 24-clock gap and the three start conditions;
* the 25000-clock timeout shared with the gap counter, and the resend buffer;
* the ACK-off switch.

This RTL chose the following:

* **Type codes and byte order.** The paper gives only the field sizes. The
  codes are ASCII "DATA" and "ACK ", and fields go most significant byte
  first.
* **Type field width.** One passage of the paper describes the transmitted
  type as a single byte. Its frame diagram shows four bytes, and it says that
  sent frames have the same structure. Four bytes are used in both
  directions. ACK frames also carry a zero length field, and DATA frames sent
  by the FPGA carry a packet number.
* **Length unit.** The length counts bytes. The largest payload, 1024 bytes,
  is inferred from the measured frame sizes; the paper states no maximum.
* **ACKs from the PC.** They travel to `eth_send` as *peer-ACK* items through
  the same FIFO as the *send-ACK* items. The paper does not say how this
  confirmation reaches the sender.
* **FIFO.** Its depth, its show-ahead read and its item format (kind byte,
  reserved byte, 16-bit number) are not given in the paper.
* **ACK frames skip the wait.** They are exempt from the "previous packet
  confirmed" condition, and FIFO items are served before DATA frames.
* **Collisions.** `col_i` is only checked before a frame starts. The paper
  says nothing about a collision during a frame.
* **Where received words go.** The paper speaks of the received words going
  both to "an output port" for the FPGA logic and to a synchronization FIFO.
  Here they leave on `rx_usr_*` in the rx clock domain, and only
  acknowledgement items cross the FIFO. Logic in another clock domain needs
  its own FIFO; an echo to the PC can be made by feeding `rx_usr_*` into
  `tx_usr_*` through one.
* **User ports.** The `pkt_end/pkt_ok` verdict outputs, the overflow flag,
  the transmit stream handshake and the status outputs are additions.
* **Not built.** The simulation set-up in the paper shows a `start` input on
  the sender whose function is not explained.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/eth_tb_pkg.sv` builds protocol frames as nibble streams and decodes
transmitted frames. It uses its own bit-serial, MSB-first CRC model, so it
shares no code with the RTL's CRC.

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/eth_pkg.sv tb/eth_tb_pkg.sv tb/tb_eth_controller.sv --top-module tb_eth_controller
./obj_dir/Vtb_eth_controller
```

Replace the testbench name for the other blocks: `tb_eth_receive`,
`tb_eth_send`, `tb_send_fifo`, `tb_resend_fifo` and `tb_crc32_d8`.

`tb_eth_controller` runs the whole core at its default parameters, with the
testbench in the role of the PC. It covers:

* a 1024-byte packet received and acknowledged;
* a corrupt packet that is dropped and not acknowledged;
* a packet of unknown type that is ignored;
* a 1024-byte FPGA packet that is not acknowledged and is resent after
  exactly 25000 clocks, then released by the PC's ACK;
* an ACK frame sent while an FPGA packet waits;
* an ACK held back by `col_i`;
* an ACK suppressed by the switch.

It counts each of these and fails if one never happens.

`tb_transfer_rate` runs the sustained-transfer case of the benchmark at the
default parameters. It does 24 stop-and-wait packets of 1024 bytes in each
direction. The PC model waits for each ACK and resends up to three times; one
retry is forced with the ACK switch. In simulation the core sustains about
10700 packets/s from the PC (turnaround limited only by the ACK frame) and
about 7700 packets/s towards the PC with a 20 us PC response time, against
the ~2936 packets/s measured on real hardware. The testbench fails below
2935.6 packets/s. It finishes in well
under a second of host time (about 2 ms simulated). `tb_eth_send` also checks
back-to-back gaps, the frame length in clocks and the 64-byte minimum.
`tb_eth_receive` checks the one-word-per-4-clocks rate and the cases that
must be dropped.
