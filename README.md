# Spy-cam: an FPGA that receives TCP video from an IP camera and shows it on VGA

An IP camera streams its picture over Ethernet. This design is the receiving
end on an FPGA board that has three things on one shared external bus: an
ASIX AX88796 Ethernet controller, a 256K x 16 asynchronous SRAM, and the FPGA
itself. No processor and no software are needed. The FPGA opens a TCP
connection to the camera and pulls every received packet out of the Ethernet
controller. It checks and parses the IP and TCP headers, stores the pixels in
SRAM, and acknowledges each segment. When a frame is complete, it copies the
frame into an on-chip screen buffer. A VGA timing generator shows that buffer
on a 640 x 480 monitor.

The working picture size is 160 x 120 pixels with one byte per pixel. That
makes 19,200 bytes per frame, about 12 frames per second. The picture is
enlarged four times in each direction for display.

```
 camera ──Ethernet──> AX88796 <──────── shared bus PB_A / PB_D ───────> SRAM 256K x 16
                         ^                      ^                            ^
                         |               pb_bus_ctrl (arbiter + cycles)      |
                         |                 ^                 ^               |
                         |                 | master 0        | master 1      |
                      nic_ctrl ────────────┘            video_conv ──────────┘
                      │    ^  ^                              │
              bytes   v    │  │ ACK frame words              v
                   ip_tcp_rx  ip_tcp_tx                  screen_buf (19,200 B, 2 clocks)
                      │  seg      ^ flags/seq/ack            │
                      v           │                          v
                      tcp_conn ───┘        frame_done     vga_out ──> VGA 640x480
                         └──── accept(pos == last) ──────> start copy
```

## The wire format

Every video segment is a 553-byte IPv4 datagram:

| bytes | content |
|---|---|
| 0–19 | IPv4 header: version 4, IHL 5, protocol 6 (TCP) |
| 20–39 | TCP header: data offset 5, no options |
| 40 | positioning byte: index of this segment within the frame |
| 41–552 | 512 pixel bytes |

Pixel `off` of segment `pos` belongs at byte `pos*512 + off` of the frame. A
160 x 120 frame is therefore segments 0 to 37. Segment 37 carries only 256
useful bytes; bytes past the end of the frame are discarded.

Everything the FPGA sends is a 41-byte datagram: an IP header, a TCP header
and one positioning byte, sent as 0. These packets are the SYN, the ACKs and
the FIN+ACK. Each is wrapped in an Ethernet II header and zero-padded to the
60-byte Ethernet minimum. The fixed IP fields are:

- TOS 0;
- flags `010` (don't fragment);
- fragment offset 0;
- TTL from the configuration input, or 64 if that input is 0;
- identification counting up by one per packet.

The TCP window is 1024 and the urgent pointer is 0.

Multi-byte fields are big-endian on the wire. The AX88796 data port is 16 bits
wide, and the first byte of each pair travels in bits [7:0].

### TCP, reduced to what a one-way stream needs (`tcp_conn`)

The FPGA is the client:

1. `connect` sends SYN with sequence number `iss`.
2. A valid SYN+ACK that acknowledges it moves the connection to ESTABLISHED
   and is answered with an ACK.
3. After that, every segment whose sequence number equals the expected one
   (`rcv_nxt`) is accepted:
   - `rcv_nxt` advances by the payload length (513 for a video segment);
   - the segment is acknowledged;
   - `accept` pulses with its positioning byte.
4. A segment out of order or repeated gets a duplicate ACK of `rcv_nxt`. Its
   pixels may already be in SRAM, but they are rewritten when the right
   segment arrives.
5. A segment that fails any check gets no answer at all, so the camera's
   retransmission repairs it.
6. FIN is answered with FIN+ACK and the connection closes. RST closes it at
   once.

Every packet the FPGA sends carries one byte of payload (the positioning
byte). Each therefore advances the FPGA's own sequence number by one, plus one
for SYN or FIN.

There is no retransmission timer on the FPGA side. Since the FPGA only ever
sends acknowledgements, only a lost SYN needs to be retried; to do that, pulse
`connect` again. Window management and options are not implemented.

### Header checking (`ip_tcp_rx`)

The parser sees the frame one byte per clock. It accepts a segment only if all
of the following hold:

- The Ethernet type is 0x0800.
- Version/IHL is 0x45 and the protocol is 6.
- The IP header checksum is correct.
- The source and destination addresses and ports are those of the configured
  link.
- The TCP data offset is 5.

Pixel bytes are passed on while the frame streams in, before the TCP
checksum, which covers the pseudo-header and the whole segment, can be known.
So a corrupted segment may leave wrong pixels in SRAM. It is not
acknowledged, though, and the camera's resend writes over the same place
before the frame is released for display.

## Driving the AX88796 (`nic_ctrl`)

This is the most involved part. The controller is the NE2000-style register
machine inside the AX88796:

- registers in pages selected by the command register (CR);
- a receive ring in its 16 KB buffer memory;
- "remote DMA" to move bytes between that buffer and the host through a data
  port.

`nic_ctrl` is a sequencer that walks short fixed lists of register accesses.
It issues one bus access at a time and waits for its completion.

The command codes it writes to CR:

| code | meaning |
|---|---|
| 0x22 | start / abort remote DMA |
| 0x0A | remote DMA read |
| 0x12 | remote DMA write |
| 0x26 | transmit |

Bits 7 to 0 of CR are PS1 PS0 RD2 RD1 RD0 TXP STA STP. Reading received data
out of the controller uses the *read* code 0x0A. Loading the acknowledgement
into it uses the *write* code 0x12.

**Buffer layout (this design's choice):**

- Pages 0x40–0x45 are the transmit buffer.
- Pages 0x46–0x7F are the receive ring.
- Each received frame starts with the controller's 4-byte header: status,
  next-packet page, byte count.
- A 553-byte segment with Ethernet header, CRC and that 4-byte header takes
  three 256-byte pages. The ring holds 19 of them.

**Phases:**

1. **INIT.** The following writes are done in order:
   1. CR = stop;
   2. DCR = 0x01 (word-wide data port);
   3. RBCR = 0;
   4. RCR = 0;
   5. TCR = loopback;
   6. PSTART and PSTOP;
   7. BNRY;
   8. TPSR;
   9. clear ISR, then IMR = packet-received;
   10. on page 1, the station address (PAR0–5) and CURR;
   11. CR = 0x22;
   12. TCR = normal.

   `ready` goes high when INIT is done.
2. **POLL.** This runs when ETHERNET_IREQ is high, or every `POLL_CYCLES`
   clocks in case an interrupt was missed. It clears the packet-received bit,
   reads CURR on page 1, and returns to page 0. If CURR differs from the page
   of the next unread frame, a frame is waiting.
3. **RXHDR.** This reads the 4-byte header at that page by remote DMA.
4. **RXPKT.** This reads the frame one 16-bit word per bus access. The
   length is the header's byte count, rounded up to even and capped at
   `MAX_FRAME`. The parser ignores the CRC and any padding after the IP
   datagram.
   - The word's two bytes go through the parser.
   - When two pixel bytes have been collected, they are written to SRAM as one
     word before the next controller read.
   - At the end: CR = 0x22, then BNRY = page before the next frame, which
     frees the ring pages.
   - The next-page value from the header is trusted as it is: there is no
     recovery from a corrupted ring header.
5. **TXCHK / TX.** These run if `tcp_conn` has a packet queued. The sequencer
   waits for the TXP bit of CR to clear and counts each busy poll in
   `txp_waits`. Then:
   1. remote DMA write (0x12) of the 30 words built by `ip_tcp_tx` to page
      0x40;
   2. TPSR and TBCR = 60;
   3. CR = 0x26.

A queued acknowledgement is always sent before the ring is polled again. So
the camera's next segment, which waits for that ACK, never finds the
FPGA busy.

## The shared bus (`pb_bus_ctrl`)

The bus signals are:

- address PB_A[19:0];
- data PB_D[15:0], brought out as `pb_d_o`, `pb_d_oe` and `pb_d_i`;
- strobes PB_OE_N, PB_WE_N, PB_LB_N, PB_UB_N;
- selects RAM_CE_N and ETHERNET_CS_N;
- ETHERNET_RDY.

The SRAM gets a word address on PB_A[17:0]. The controller gets its register
offset on PB_A[4:0], with 0x10 as the data port.

Two masters share the bus, `nic_ctrl` and `video_conv`, under round-robin
arbitration. A master holds its request struct until its `done` pulse. One
access:

| clock | what happens |
|---|---|
| arbitration | one idle clock |
| ACCESS × `SRAM_WAIT` (1), or × `ETH_WAIT` (3) and then until ETHERNET_RDY is high | chip select and OE_N/WE_N low; read data captured on the last clock |
| END | strobes released while address and data are still driven; `done` |

An SRAM access on its own thus takes 3 clocks (54 ns at 18 ns). An assertion
checks that the two chip selects are never active together.

## Frame storage and display

- **SRAM frame store.** Pixel `2w` of the frame goes in bits [7:0] of SRAM
  word `FRAME_BASE + w`, and pixel `2w+1` in bits [15:8].
- **Frame completion.** `frame_done` pulses when the segment with the last
  positioning byte (37) is accepted in order.
- **`video_conv`.** It then reads the 9,600 words of the frame and writes
  their 19,200 bytes into `screen_buf`. A request that arrives during a copy
  is remembered. A copy takes about 5 clocks per word, roughly 0.9 ms.
- **`screen_buf`.** A dual-clock RAM. It is written in the system clock domain
  and read, with one clock of latency, in the pixel domain.
- **`vga_out`.** Generates standard 640 x 480 timing:
  - lines of 800 pixels (16 front porch, 96 sync, 48 back porch);
  - frames of 525 lines (10 front porch, 2 sync, 33 back porch);
  - active-low syncs.

  Screen pixel (x, y) shows source pixel (x/4, y/4). The byte is RGB 3-3-2,
  expanded to 8 bits per colour by repeating its bits. All outputs lag the
  counters by two pixel clocks.

There is a single screen buffer. A copy running while the picture is
scanned can tear one VGA frame.

### Live mode (`LIVE = 1`)

The top-level parameter `LIVE` selects a second way to fill the screen
buffer. Each pixel byte the parser passes on is written to SRAM as usual. One
clock later, the same byte is also written straight into the screen buffer at
the same place.

- The picture then updates segment by segment, with no copy delay.
- The video converter stays idle and never takes the bus.
- `frames_copied` counts completed frames instead of copies.

The price is that a segment which later fails its TCP checksum is visible
until the camera resends it. It is also possible to see a mix of two frames.
The default, `LIVE = 0`, shows only whole frames.

### Clocks and reset

`clk` is the 18 ns (55.6 MHz) system clock for everything except the VGA side.
`pix_clk` is a 36 ns (27.8 MHz) clock for `vga_out` and the read side of
`screen_buf`. With the standard 800 x 525 raster, that clock gives about
66 Hz refresh instead of 60 Hz. Use 25.2 MHz for a strict 60 Hz mode.

`rst` is synchronous and active high. It is passed through two flip-flops
into the pixel domain.

## Where the design takes a position

This RTL implements an existing design description of the camera link
(called "the source" below). Some points in that description are open or
contradict each other. The RTL takes these positions:

- **DMA direction.** The source's prose describes the two remote DMA
  directions the other way round. The register codes settle it: 0x0A reads
  from the controller, 0x12 writes into it.
- **Segment length.** The source's IP table gives a total length of 0x217
  (with a comment of 537 bytes) and a 4-byte TCP header. Elsewhere it gives
  553 bytes with a 20-byte TCP header. The RTL uses 553 bytes and 20-byte
  headers. The parser takes the length from the received header and accepts
  any length.
- **TCP field widths.** The TCP offset/reserved fields are the standard 4 and
  6 bits, with offset 5.
- **Positioning byte.** It is the first payload byte. No position for it was
  given.
- **Copying to the screen buffer.** The source draws the data path as SRAM,
  then video converter, then VGA. It also says the pixels go to SRAM and the
  screen buffer at the same time. Both are built:
  - `LIVE = 0` (the default) copies complete frames;
  - `LIVE = 1` writes the pixels into both places as they arrive.
- **Acknowledgements.** They are not staged in SRAM. They are built on the fly
  and written straight into the controller.
- **Configuration.** Addresses, ports, TTL and the initial sequence number
  are inputs, as a processor or DIP switches would supply them.
- **Own choices.** Register values other than the four command codes, the
  ring layout, bus timing and arbitration, VGA timing, the RGB 3-3-2 format
  and the ×4 scaling are all this design's own.
- **Raw pixels.** The camera is assumed to send raw pixels. A camera that
  sends JPEG or MPEG-4 would need a decoder between the SRAM and the screen
  buffer, and none is included.

## Limits

The 640 x 480 picture does not fit at the default parameters:

- It is 307,200 bytes. That fits in the 512 KB SRAM.
- The one-byte positioning field can only address 256 x 512 = 131,072 bytes.
- The on-chip screen buffer is sized for 19,200 bytes.

Raising `FRAME_W`/`FRAME_H` beyond 256 segments' worth of pixels needs a wider
positioning field.

At 160 x 120 the design is far from its limits. In simulation, one frame
takes 170,699 clocks (3.1 ms) from its first segment to the end of the copy.
That includes the time to parse, store and acknowledge all 38 segments one at
a time. 12 frames per second allows 83 ms per frame.

## Files

| file | contents |
|---|---|
| `rtl/spycam_pkg.sv` | command codes, register offsets, header constants, bus and segment structs, checksum helper |
| `rtl/spycam_top.sv` | the top level, parameters `FRAME_W`, `FRAME_H`, `SCALE`, `POLL_CYCLES`, `LIVE` |
| `rtl/nic_ctrl.sv` | AX88796 driver |
| `rtl/ip_tcp_rx.sv` | receive parser and checker |
| `rtl/ip_tcp_tx.sv` | acknowledgement packet builder |
| `rtl/tcp_conn.sv` | connection state and sequence numbers |
| `rtl/pb_bus_ctrl.sv` | shared bus arbiter and cycle generator |
| `rtl/video_conv.sv` | SRAM to screen buffer copy |
| `rtl/screen_buf.sv` | dual-clock frame RAM |
| `rtl/vga_out.sv` | VGA timing and scaling |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_spycam_live.sv` | end-to-end test of live mode |
| `tb/ax88796_model.sv` | behavioural model of the Ethernet controller's host side |
| `tb/sram_model.sv` | behavioural model of the SRAM |
| `tb/tb_net_pkg.sv` | packet building and checksum helpers for the testbenches |

The AX88796 model implements what the driver uses:

- the paged registers;
- the ring with its 4-byte headers and wrap-around;
- remote DMA in both directions;
- transmit with a busy TXP bit for 3,000 clocks;
- the interrupt line;
- a random number of ETHERNET_RDY wait states on every access.

It is a model of the register interface, not of the chip's timing.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes, and
carries a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_spycam_top \
    rtl/spycam_pkg.sv rtl/*.sv tb/tb_net_pkg.sv tb/sram_model.sv \
    tb/ax88796_model.sv tb/tb_spycam_top.sv
./obj_dir/Vtb_spycam_top
```

The package files must come first. For a single block, give the package, the
module and its testbench, plus `tb/tb_net_pkg.sv` and the models where the
testbench uses them.

The end-to-end test `tb_spycam_top` runs the whole design at its default
sizes. It finishes in a few seconds:

1. The camera side answers the SYN.
2. It sends two complete frames, stop-and-wait.
3. Along the way it inserts a corrupted segment, a segment for another port
   and a repeated segment.
4. It checks the screen buffer against both frames and one whole VGA frame
   pixel by pixel.
5. It closes the connection.

It also checks that each of these happened at least once:

- the ring wrapped;
- ETHERNET_RDY wait states occurred;
- the transmitter was found busy;
- a bad segment was dropped;
- a foreign segment was dropped;
- a duplicate ACK was sent.

Finally it checks that a frame takes less than 1/12 s.

`tb_spycam_live` runs one frame with `LIVE = 1`. After every acknowledged
segment it checks three things:

- that segment's pixels are already in the screen buffer;
- the next segment's place still shows the old picture;
- SRAM holds the same pixels.

It also checks that a corrupted pixel is shown until the resent segment
replaces it.
