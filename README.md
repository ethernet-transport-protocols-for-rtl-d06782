# FADE-10g FPGA transport core

A small FPGA that has to ship data to a PC over 10 Gb Ethernet needs the
transfer to be reliable, but it does not need TCP/IP. TCP's routing,
congestion control and defences against hostile peers cost logic and
latency. They are no use when the FPGA is cabled straight to the network
card of the computer that collects its data. This core implements the FPGA end of
FADE-10g, a much simpler reliable protocol (W. M. Zabołotny, "Ethernet
transport protocols for FPGA"). It works like this:

* It uses its own Layer 3 protocol, Ethertype `0xfade`, with no IP and no routing. The first
  machine that receives a packet acknowledges it, so the acknowledge latency is a few
  microseconds.
* Every packet stays in an FPGA buffer until it is acknowledged. The memory needed is
  roughly `rate × acknowledge latency`, so short latency means small memory.
  At 10 Gb/s and 3 µs that is 3.75 KiB, less than one packet.
* ACKs come back in order. An ACK for a later packet therefore proves that the earlier
  unacknowledged packets were lost, and they are resent at once, with no
  timer. A *repetition number* stops the same loss from being repaired twice.

The core takes 64-bit words from user logic and packs them into 8 KiB
packets. It drives the PHY over XGMII and executes commands (START, STOP,
RESET and user-defined ones) sent by the PC. At the defaults it has 32 packet
buffers (256 KiB) and runs at 156.25 MHz.

## Block structure

```
            +-------------+    +---------------+    +-----------------+
 XGMII rx ->| pkt_receiver|--->| ack_cmd_fifo  |--->|                 |<- dta, dta_we
            +-------------+    +---------------+    |  desc_manager   |-> dta_ready
                  | peer MAC                        |                 |-> cmd_valid/code/arg
                  v                                 +-----------------+
            +-------------+    +---------------+        | write port
 XGMII tx <-| pkt_sender  |<---|  pkt_buffers  |<-------+
            +-------------+    +---------------+
                  ^------------- tx offer / take, command response ----'
```

| file | role |
|---|---|
| `rtl/fade_pkg.sv` | protocol constants, message structs, descriptor states, CRC-32 function |
| `rtl/fade_core.sv` | top level; wires the five blocks |
| `rtl/desc_manager.sv` | buffer ownership, packet numbering, (re)transmission decisions, commands |
| `rtl/pkt_buffers.sv` | `NBUF × PKT_WORDS × 64` simple dual-port RAM, one-cycle read |
| `rtl/pkt_sender.sv` | frame builder and XGMII transmitter, FCS generation |
| `rtl/pkt_receiver.sv` | XGMII receiver, FCS/address/protocol checks, ACK/command decode |
| `rtl/ack_cmd_fifo.sv` | FIFO from receiver to descriptor manager |

The whole core runs in one clock domain. The XGMII buses use the same clock,
156.25 MHz for 10GBASE-R. The Ethernet PHY (PCS/PMA and transceiver) is not
part of this RTL. Connect a vendor 10G PHY at the XGMII ports. Reset is
synchronous and active low.

### Top-level ports (`fade_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `dta`, `dta_we` | in | 64, 1 | user word; taken in a cycle with `dta_we && dta_ready` |
| `dta_ready` | out | 1 | high after START while the head buffer is free |
| `xgmii_txd`, `xgmii_txc` | out | 64, 8 | XGMII transmit, lane 0 in bits 7:0 |
| `xgmii_rxd`, `xgmii_rxc` | in | 64, 8 | XGMII receive |
| `cmd_valid`, `cmd_code`, `cmd_arg` | out | 1, 16, 32 | one-cycle strobe for every executed command |
| `user_resp` | in | 64 | user-defined 8 bytes of the command response, sampled at execution |
| `running` | out | 1 | between START and the end of STOP |
| `ev_retx`, `ev_timeout`, `ev_rx_drop` | out | 1 | strobes: ACK-detected loss, timeout resend, message lost to a full FIFO |

Parameters: `NBUF` (32), `PKT_WORDS` (1024), `MY_MAC` (`02:00:00:00:00:01`),
`TIMEOUT` (65536 cycles), `FIFO_DEPTH` (16). `NBUF`, `PKT_WORDS` and
`FIFO_DEPTH` must be powers of two. The protocol's packet size is 1024 words.
Smaller values are meant for fast simulation only: the PC side expects 8 KiB
packets.

## Loss detection and the repetition number

This is the part of the design that takes the most care to get right. It
lives in `desc_manager`.

Each buffer has a descriptor with a state, a packet number, a repetition
number and a last flag. The states are:

| state | meaning |
|---|---|
| `D_FREE` | empty, or being filled if it is the `head` buffer |
| `D_PENDING` | full, waiting to be sent or resent |
| `D_INFLIGHT` | sent, waiting for its ACK |
| `D_ACKED` | acknowledged; freed when it becomes the oldest buffer (`tail`) |

The manager keeps one global counter, `gen`. Every transmission is tagged
with the current `gen`. The descriptor stores the tag and the frame carries
it as the *repetition number*. The PC echoes the tag in its ACK. When an ACK
(packet `P`, repetition `R`) is taken from the FIFO, these steps happen in
one cycle:

1. The descriptor holding `P`, if pending or in flight, becomes `D_ACKED`.
2. Every `D_INFLIGHT` descriptor whose packet number is before `P` (32-bit
   serial-number comparison) and whose repetition number is not after `R`
   (16-bit serial-number comparison) was lost. It goes back to `D_PENDING`.
3. If step 2 found anything, `gen` increments once.

Because ACKs come back in the order the packets were sent, step 2 finds
exactly the packets sent before this copy of `P` that never reached the PC.
A packet that has already been resent carries a larger tag than any ACK for
packets sent before the resend. A late ACK therefore does not resend it a
second time. If the resent copy is lost too, the first ACK for a packet sent
after it carries a tag at least as large, and the packet is resent again.

Worked example: packets 0–3 go out with tag 0, and packet 0 is lost.

* ACK(1, 0) arrives. Packet 0 (tag 0 ≤ 0) is resent with tag 1, and `gen`
  becomes 1.
* ACK(2, 0) arrives. Packet 0 now has tag 1 > 0, so nothing is resent.

The descriptor-manager testbench checks this sequence step by step.

The protocol states the rule as resending packets whose repetition number is
*lower than* the ACK's. Read strictly, a first copy would never be resent,
because it carries the same number as the ACK that reveals its loss. This
design therefore uses *not greater than*.

The ACK rule cannot repair a loss that no later ACK reveals, such as the last
packet of a burst or a lost ACK at the end. The design adds a timeout for
this case. If packets are in flight and no ACK has arrived for `TIMEOUT`
cycles, every in-flight packet goes back to pending and `gen` increments.

Other descriptor rules:

* `tx_valid` always offers the oldest pending buffer, searched circularly from
  `tail`.
* An acknowledged buffer is not freed while `pkt_sender` is still reading it
  (`snd_busy`/`snd_buf`). This is possible when the ACK of a first copy
  arrives while a retransmission is on the wire.
* The user source stalls (`dta_ready` low) when the next buffer in the ring is
  not free.

## Commands and the end of a run

The PC sends a command packet with a code, a 16-bit sequence number and a
32-bit argument. The manager takes at most one command per cycle, and only
while no earlier response is still waiting. Otherwise the command waits in
the FIFO.

| code | action |
|---|---|
| `0x0001` START | accept user data |
| `0x0002` STOP | close the partly filled buffer as the *last packet*; stop accepting data |
| `0x0004` RESET | clear every descriptor, counter and flag |
| other | only shown to user logic |

The ACK code is `0x0003`. The other three codes are this design's choice;
change them in `fade_pkg`. Every command pulses `cmd_valid` and leaves a
response: code, sequence number and `user_resp`.

STOP writes the number of data words used (0–1023) into word 1023 of the
buffer. The packet is sent with ID `0xa5a6` instead of `0xa5a5`. This is how
the PC finds the end of the data. Commands with a repeated sequence number
are executed again.

## Frames on the wire

All protocol fields are sent most significant byte first. Data words are sent
least significant byte first, so a little-endian PC reads them back
unchanged. Each frame is a start/preamble word, the frame words and a
terminate word, followed by at least one idle word.

Frames the core sends:

| bytes | data packet | command response |
|---|---|---|
| 0–5 | PC MAC (learned) | PC MAC |
| 6–11 | `MY_MAC` | `MY_MAC` |
| 12–15 | `fa de 01 00` | `fa de 01 00` |
| 16–17 | `a5 a5` (last: `a5 a6`) | `a5 5a` |
| 18–29 | embedded response (zeros if none) | `00 00`, then response 20–31 |
| 30–31 | repetition number | response (cont.) |
| 32–35 | packet number | zero padding to byte 59 |
| 36–8227 | 1024 data words | — |
| then | FCS (4 bytes) | FCS at 60–63 (64-byte frame) |

The data header is 36 bytes, not a multiple of 8. Each XGMII word after the
header therefore carries the upper half of one buffer word and the lower
half of the next. The 4-byte FCS exactly fills the upper half of word 1028.
`pkt_sender` reads buffer word `m` one cycle before XGMII word `m+4` is
formed. It keeps the upper half of the previous word in `prev_hi`.

A data packet occupies 1032 clock cycles: 1 preamble word, 1029 frame words,
1 terminate word and 1 idle word. The sender can start the next packet in
the following cycle. The peak goodput is 1024/1032 × 64 bit × 156.25 MHz
= 9.92 Gb/s. The published hardware measured 9.80 Gb/s.

A waiting command response goes into the next data packet. If there is no
packet to send, it goes out in a 64-byte frame of its own. Data packets,
including retransmissions, have priority.

Frames the PC sends are accepted when all of these hold:

* the FCS is correct;
* the frame is at least 64 bytes long;
* the target is `MY_MAC`;
* the Ethertype is `0xfade` and the version is `0x0100`.

The payload is code, sequence or repetition number, argument or packet
number, and for ACKs a 4-byte transmission-delay field, which the core
ignores. Frames may be padded to any length, for example 78 bytes. The
source address of the last accepted frame is the destination of everything
the core sends. The start character may be in lane 0 or lane 4. The
receiver delays the bus by one word and, for a frame that starts in lane 4,
shifts it by four lanes, so the parser always sees lane-0 frames.

## Where this design goes beyond the protocol description

The protocol description gives the packet formats, the block structure, the
ordering assumption and the repetition-number idea. It does not give the
internals. These points are this design's own choices:

* the descriptor ring and its states;
* the global `gen` counter and the "not greater than" comparison;
* the retransmission timeout;
* the command codes for START, STOP and RESET;
* `MY_MAC`, the address check and learning the PC address;
* the byte order of fields and data words;
* the 64-byte response frame;
* FIFO depth 16 and dropping messages when it is full;
* the frame scheduling priorities;
* the single clock domain.

Not implemented:

* separate connect and disconnect packets: the PC becomes the peer by
  sending any valid frame, usually its first command;
* the 1 Gb/s and multi-link variants of the protocol;
* the Ethernet PHY;
* duplicate-command suppression by sequence number;
* any use of the ACK's transmission-delay field.

The Linux driver on the PC is software and is not part of this RTL. The
testbench contains a behavioural model of its packet handling.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_fade_core` | full size (32 × 1024 words); a PC model checks every frame byte and FCS, ACKs after 469 cycles (3 µs); forces loss found by a later ACK, suppression of a second resend, loss of a resent copy, an ACK with a bad FCS, a timeout resend, a source stall, embedded and standalone responses, the last packet with its word count, back-to-back packets exactly 1032 cycles apart, START/STOP/RESET and a user command; frames to the core alternate between lane-0 and lane-4 starts |
| `tb_fade_core_nbuf16` | the same run with 16 buffers, the smaller synthesized configuration |
| `tb_desc_manager` | 4 buffers × 8 words, timeout 200; step-by-step check of the rules above |
| `tb_pkt_sender` | full-size frames from a memory model: every byte, FCS, embedded/standalone response, 1032-cycle spacing |
| `tb_pkt_receiver` | frames of 64–80 bytes (every terminate lane), starting in lane 0 or 4, plus bad FCS, wrong address, Ethertype, version, short frame, error character |
| `tb_pkt_buffers` | full-size memory, random writes and read-back, one-cycle latency |
| `tb_ack_cmd_fifo` | random traffic against a queue model, full/empty |

The reference CRC in `tb/tb_fade_pkg.sv` is a separate bit-serial
implementation. It is itself checked against the standard CRC-32 check
value.

Running a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fade_pkg.sv tb/tb_fade_pkg.sv tb/tb_fade_core.sv --top-module tb_fade_core
./obj_dir/Vtb_fade_core
```

The full-size end-to-end run takes well under a second: about 160,000 cycles,
including one timeout period. The testbenches are simulation-only and use
queues and classes. The RTL is plain synthesizable SystemVerilog. The packet
buffer is a memory array, which an FPGA tool maps to block RAM: 2 Mbit at
the defaults.
