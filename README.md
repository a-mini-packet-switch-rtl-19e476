# Mini packet switch

A four-port packet switch small enough to build from the parts of an
introductory digital-design lab: counters, a decoder, a multiplexer and
demultiplexer, a parity checker, a two-bit decrementer, a shift register and
one state machine. Four computers talk to it over RS-232 at 9600 bit/s. The
switch polls them in turn. It takes a two-character packet from the computer
it is polling, checks the packet and sends it on to the destination computer,
which may be the sender itself.

The switch has no buffer memory beyond one 21-bit shift register. That
register is the whole story. The packet is received into it, checked and
patched in place, and then shifted straight out onto the destination line.
The register already holds the start and stop bits, so the output needs no
UART.

## The frame

A packet is one 21-bit frame, numbered b00 to b20 and sent LSB first:

| bits      | field                                  |
|-----------|----------------------------------------|
| b20       | stop                                   |
| b19..b12  | message character (ASCII)              |
| b11       | start                                  |
| b10       | stop                                   |
| b09       | even parity over b19..b12 and b08..b02 |
| b08       | message type (1 = nickname, 0 = text)  |
| b07..b06  | time-to-live (TTL)                     |
| b05..b04  | source PC                              |
| b03..b02  | destination PC                         |
| b01       | start                                  |
| b00       | stop / idle                            |

On the wire this is exactly two ordinary 8N1 characters: first the header
byte b09..b02, then the message byte. Each computer sends them as two
characters. The switch sends them back out as a single 21-bit shift. The
leading b00 is a stop bit, so the first bit of the output may be short
(Contador21 is started at an arbitrary point in a baud period) and no harm
is done.

`mps_pkg::frame_t` gives the same layout as a packed struct.

## How one packet moves

The controller (`controlador`) is a Moore machine. Each state raises at most
one of the thirteen control lines S0..S12. Three done signals move it on:
E0 (byte received), E1 (ten shifts done) and E2 (frame sent).

1. The decoder enables the polled PC. ARx receives the header character and
   raises E0.
2. **S0** steps the polling counter, which disables the PC. **S1** loads the
   byte into b19..b12. **S2** runs Contador10, which shifts the register
   right ten times so the header lands in b09..b02.
3. **S3** rearms ARx. **S0** re-enables the same PC, which sends the message
   character. On E0, **S0** disables the PC again and **S1** loads the
   character into b19..b12.
4. **S4** checks the parity. If it is wrong, RST1 clears everything except
   the polling counter, and the packet is dropped.
5. **S5** decrements the TTL. If the result is zero, RST2 clears everything
   the same way.
6. **S6** latches the new TTL and **S7** writes it into b07..b06. **S8**
   latches the regenerated parity and **S9** writes it into b09.
7. **S10** latches the destination bits b03..b02 into the demultiplexer
   select. **S11** forces the five start/stop bits.
8. **S12** runs Contador21. It passes 21 baud ticks to the register, so the
   frame leaves on Q[0] at 9600 bit/s.
9. **S3** rearms ARx, and **S0** moves polling to the next PC.

A dropped packet takes the same exit (S3, then S0). The next PC is polled
whatever happened to the packet. There is no retransmission and no error
message. Those are left to the chat software on the computers.

## Polling: Contador16 and the decoder

The polling counter counts modulo 16. Each step is one S0 pulse. Bits 3:2
are the number of the polled PC. They drive the input multiplexer and the
decoder's L3 and L2 inputs. Bit 0 drives the decoder's L0 input. While it is
1, no PC is enabled. One PC's turn therefore takes four steps: enable,
disable, enable, disable. The fifth step enables the next PC, and sixteen
steps cover all four PCs.

The parity and TTL resets leave this counter alone. After a drop, the
counter still points at the PC that sent the bad packet, with bit 0 set, so
the single S0 on the exit path moves on to the next PC.

This use of the counter bits is this design's interpretation. The original
names the decoder inputs L3, L2 and L0, and says only that the counter and
decoder enable one computer at a time. The enables `en_pc[3:0]` are active
high and brought out as ports. How they reach a computer (for example a
modem-control line) is outside the logic. The computers are expected to send
each character only while enabled.

## Blocks

| module          | role |
|-----------------|------|
| `btg`           | baud tick generator: a 1-clock tick every 417 clocks (4 MHz / 9600) |
| `pc_mux`        | 4:1 selects the polled PC's line for the receiver |
| `decodificador` | transmit enables from counter bits L3, L2, L0 |
| `contador16`    | polling counter, cleared only by the general reset |
| `arx`           | receiver: start bit, 8 data bits LSB first, stop bit; E0 holds until S3 |
| `contador10`    | 10 shift pulses on S2, then E1 |
| `contador21`    | 21 baud-tick shift pulses on S12, then E2 |
| `ccp`           | parallel-load cell: enable + new value -> active-low set/reset |
| `shiftreg21`    | the frame register with its 11 CCP cells (8 message, 1 parity, 2 TTL) |
| `paridade`      | parity check (RST1 = S4 and odd parity) and new parity NB9 |
| `deccomp`       | TTL - 1, and RST2 = S5 and (TTL - 1 = 0) |
| `ttl_latch`     | holds the new TTL between S6 and S7 |
| `parity_ff`     | holds the new parity bit between S8 and S9 |
| `pc_demux`      | destination flip-flops loaded by S10; routes Q[0] to that PC |
| `controlador`   | the sequencer above |
| `mini_packet_switch` | top level |

The RS-232 level converters (MAX232) and the 4 MHz crystal oscillator are
bought parts with no logic. The top's ports stand where they would connect:
`clk`, and the logic-level lines `pc_tx` and `pc_rx`.

## Timing

- Everything runs on one clock (`clk`, 4 MHz). All resets are synchronous
  and active high.
- The baud tick is a one-clock enable, not a derived clock.
- The receiver samples once per tick, with no oversampling. This is how the
  original works: its receiver is clocked by the baud tick generator. The
  sample point lands anywhere inside a bit. That holds up because the
  computers and the switch run at the same nominal rate (9592 bit/s here,
  0.08 % off 9600).
- A forwarded packet occupies its destination line for 21 bit times. The
  two start bits on the output are exactly 10 bit times apart.
- Controller overhead between the characters is a few tens of clocks, far
  less than one stop bit.

## Where this design departs from, or adds to, the original

- **Clocking.** Single clock with enables. The original uses the baud tick
  as a clock and asynchronous preset/clear on the register flip-flops. Here
  the CCP outputs act as synchronous set/clear.
- **Drop path.** The original says a parity or TTL failure resets "all
  circuits but Contador16", and that polling then restarts with the next
  computer. It shows a controller with no input for this. Here the
  controller has an extra `drop` input (RST1 or RST2), which sends it to its
  exit states.
- **State count.** The original gives the controller 22 states but does not
  list them. This one has 20.
- **TTL rule.** The zero test is made on the decremented value. A packet
  sent with TTL 1 is dropped. A packet sent with TTL 0 wraps to 3 and is
  forwarded, a case the original does not discuss.
- **Parity cover.** Parity covers b19..b12 and b09..b02. These are the
  inputs drawn for the parity block.
- **Idle levels.** The register resets to all ones and shifts in ones, so
  Q[0] idles high. Lines of PCs that are not the destination are held at 1.
  The destination flip-flops are cleared by the general reset; the
  original ties their clears inactive.
- **Framing errors.** A character whose stop bit reads 0 is discarded by
  the receiver (not covered by the original).
- **Baud rate.** The divider is 417, i.e. round(4 000 000 / 9600).

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. For example, the whole switch at full size:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mps_pkg.sv \
    tb/tb_mini_packet_switch.sv --top-module tb_mini_packet_switch -o sim
./obj_dir/sim
```

`tb_mini_packet_switch` runs the switch at its default parameters. Four
computer models send packets with random bit phase. Each computer has a
reference receiver that checks every frame against the rules above. The
test drives packets that are forwarded, dropped for parity, dropped for TTL,
looped back to the sender, and sent with TTL 0. It checks that every
mechanism occurred, and that polling visited all four PCs in order and
wrapped from PC3 to PC0. It takes about one second of wall-clock time.

`tb_chat_session` runs the switch's intended use. Each computer announces
a nickname to the three others, one character per packet with the
message-type bit set. The switch has no broadcast address, so this is one
packet per peer. Each computer then sends a line of text to its neighbour.
Idle computers send filler packets. Every receiver rebuilds the strings per
sender, and the test checks them against what was sent.

The top's parameters `CLK_HZ` and `BAUD` set the divider. The 21-bit frame
width and the 10/21 counts are tied to the frame format, and `shiftreg21`
asserts the width.
