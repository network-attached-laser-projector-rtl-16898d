# Network-attached RGB laser projector

A laser projector draws a picture by steering one beam over a list of points:
two galvanometer mirrors move the beam in x and y, and the red, green and blue
laser diodes are switched to give each point its colour. This design is the
FPGA logic of such a projector that takes its point lists straight off a
100 Mbit/s Ethernet LAN. There is no processor. A hardware network stack
receives UDP datagrams full of points, and a display controller keeps
redrawing the last complete frame while it collects the next one.

A host computer turns an image into a vector trajectory: it rescales the image
to 512x512, finds the edges, and orders the edge pixels into a path. It then
sends the points as UDP datagrams. The FPGA writes x and y to two 16-bit SPI
DACs, which drive the galvanometer amplifiers. It sends r, g and b as PWM to
three constant-current laser drivers. Everything outside the FPGA is off-chip
and is not part of this RTL. That covers the Ethernet PHY chip, the DACs and
their buffer amplifiers, the galvanometers, and the laser current sources.

```
 RMII ──► mac_rx ──► mac_rcv_if ──► rx_pktbuf (byte registers) + doorbell
          (crc32)                     │
                     ┌────────────────┼──────────────────────┐
                     ▼                ▼                      │
                  arp_echo         ipv4_rx ◄─► inet_checksum │
                  (arp_table)         │ ip_ok                │
                     │ tx_pktbuf      ▼                      │
                     │ + drbl       udp_rx  ◄─► inet_checksum│
                     ▼                │ netout (64-bit words)
 RMII ◄── mac_tx ◄── mac_tx_if        ▼
          (crc32)             display_controller
                              BRAM_0 / BRAM_1 ── spi x, spi y ──► jd[0,4,5,6]
                                              └─ pwm r, g, b  ──► jd[1..3]
```

## The point record

Each point is one 64-bit word, sent in network byte order. The same word is
stored unchanged in the framebuffer.

| bits   | 63:56 | 55:40 | 39:24 | 23:16 | 15:8 | 7:0 |
|--------|-------|-------|-------|-------|------|-----|
| field  | cmd   | x     | y     | r     | g    | b   |

- `cmd = 0x01` is a point of the frame that is being loaded.
- `cmd = 0x02` ends the frame and swaps the framebuffer banks. Its other
  fields are ignored.
- Any other `cmd` is ignored.

The UDP payload is cut into 64-bit words in order. A datagram may therefore
carry a single point, many points, or points followed by the swap command. A
trailing partial word is dropped. The type is `netpkg::point_t`.

## Network offload engine (`netstack`)

### Receive side and the doorbell

`mac_rx` watches the RMII receive pins, which carry one dibit per 50 MHz clock
with bit 0 first. It waits for the `01` preamble dibits and the `11` that ends
the start-of-frame delimiter. It then passes every dibit on and feeds it to a
`crc32_bzip2` engine.

That engine is the Ethernet CRC-32 (polynomial 0x04C11DB7) run over the bits
in the order they cross the wire, in a non-reflected register. Run that way,
the IEEE 802.3 FCS is the familiar CRC-32/BZIP2 register. No bit reversal is
needed anywhere, and a good frame followed by its own FCS leaves the fixed
residue 0xC704DD7B in the register. At the end of the frame, `mac_rx`
reports whether that residue is present and the frame is a whole number of
bytes.

Finding the end of the frame takes care. When an RMII PHY loses carrier while
it still holds data, it does not simply drop CRS_DV. It lowers CRS_DV on the
first dibit of each remaining nibble and raises it on the second, and the data
stays valid throughout. So `mac_rx` holds each dibit for one clock. A held
dibit is data if CRS_DV was high when it arrived, or is high one clock later.
CRS_DV low on two clocks in a row ends the frame.

`mac_rcv_if` packs the dibits into bytes in `rx_pktbuf`. This is a plain array
of byte registers, and every protocol block reads fields straight out of it at
fixed offsets. At the end of a good frame the interface drops the four FCS
bytes from the length and pulses `doorbell`. There is one buffer, and the next
frame starts to overwrite it from byte 0 about 80 clocks after the doorbell,
at 4 clocks per byte. Every block that reads the buffer after that point does
so at one byte per clock or faster, starting at a higher offset, so it stays
ahead of the writer. The UDP checksum pass is the one long reader: see
`udp_rx` below.

### Parallel protocol blocks

Every doorbell goes to all protocol blocks at once. Each block looks at the
EtherType and takes only its own frames.

- **`arp_echo` + `arp_table`** handle two kinds of frame.
  - ARP follows the RFC 826 algorithm, using a table with a single entry that
    normally holds the gateway. If the sender is already in the table, its
    MAC address is refreshed. If the request is for our IP address, the sender
    is entered in the table, and a request gets a 42-byte reply written into
    `tx_pktbuf`.
  - The echo service uses EtherType 0x88B5. It copies the frame back into
    `tx_pktbuf`, one byte per clock, with the addresses swapped. This lets the
    MAC be tested from a host without any IP in the path.
  - Our own MAC and IP addresses are fixed parameters.
  - The table is updated by every ARP frame.
  - An ARP reply waits for the transmitter's `avail` signal.
  - An echo cannot wait. Its bytes live in the receive buffer, and the next
    frame overwrites that buffer. The copy therefore starts at the doorbell.
    At one byte per clock, it stays ahead of the receiver's four clocks per
    byte. If the transmitter is still busy at that moment, the echo is
    dropped.
  - A reply or echo doorbell that comes while one is still pending is
    ignored.
- **`ipv4_rx`** is a firewall. It accepts a frame only if all of these hold:
  - the header is version 4 and at least 20 bytes long;
  - the destination is our address;
  - the protocol is UDP;
  - the datagram is not a fragment;
  - the total length fits in the frame.

  It then streams the header through an `inet_checksum` instance (RFC 1071)
  and raises `ip_ok` only if the checksum verifies. Anything else raises
  `ip_drop`.
- **`udp_rx`** checks the destination port (parameter `MY_PORT`, default 5005)
  and the UDP length. If the datagram's checksum field is non-zero, the block
  streams the pseudo-header and the segment through a second `inet_checksum`.
  It then puts out the payload one 64-bit word per clock on
  `netout`/`netout_valid`.

  The checksum pass of a long datagram can outlast the time before the next
  frame overwrites the start of its payload. For that reason the block
  collects the payload words into a staging memory as they stream past the
  checksum, and puts them out from there once the sum verifies. It serves one
  datagram at a time. A checksummed datagram of UDP length L keeps it busy for
  about L + 15 + L/8 clocks. A datagram that arrives during that time is
  dropped with `udp_drop`.

  The window is about 1.1 L clocks, while a datagram of that size takes
  about 4 L clocks on the wire. Back-to-back datagrams of similar size are
  therefore never affected, and one point per datagram is always safe. A
  short datagram sent right behind a long checksummed one is affected. For
  example, a swap datagram sent directly after a full 184-point datagram
  arrives after 336 clocks, when it needs about 1700. It should be sent a
  few microseconds later, or placed at the end of the last datagram of
  points. Datagrams without a checksum keep the block busy for only
  2 + L/8 clocks.

### Transmit side

The sender writes a frame into `tx_pktbuf` and rings `drbl` with the length.
It may do this only while `avail` is high. `mac_tx_if` presents the frame as
dibits, and `mac_tx` sends it in this order:

1. 31 preamble dibits;
2. the delimiter;
3. the frame;
4. zero padding up to 60 bytes;
5. the FCS, shifted out of its own `crc32_bzip2` engine (`dostep`);
6. a 48-clock inter-frame gap.

## Display controller (`display_controller`)

Two `bram_bank`s of 4096 x 64 bits form a double buffer. `bram_select` names
the bank being filled:

- Each `0x01` word is written at the next address of that bank.
- A `0x02` word saves that address as the length of the new frame, toggles
  `bram_select`, and restarts filling at address 0.
- Points that arrive when the bank is full are dropped, and the sticky
  `overflow` flag is set.

Because a frame is shown only after it is complete, a slow or bursty network
cannot tear the picture.

The scan side reads the other bank from address 0 to the saved length and
starts again from 0, so a frame is redrawn until the next swap arrives. After
a swap, the point already being sent is finished, and scanning then restarts
at the first point of the new frame. While the frame is empty, for example
before the first swap, the lasers are kept off.

For each point, x and y go out at the same time on two SPI masters (`spi`):
16-bit words, mode 0, MSB first, with `sclk` = clk/4. The two buses share
SCLK and CS. When both words are sent, the point's r, g and b become the duty
values of three 8-bit PWM generators (`pwm`). These have a 256-clock period,
195 kHz at 50 MHz, and take a new duty only at a period boundary, so the colour
follows the DAC update within one PWM period.

Each point is held for `POINT_CLKS` clocks (default 2048), or for the SPI
transfer time if that is longer. The default gives 24.4 k points/s, about what
galvanometers can follow, and eight PWM periods per point. Without this hold
the SPI buses alone would allow 746 k points/s. That is far too fast for the
mirrors, and shorter than one PWM period.

Pins of the `jd` header (from the board wiring):

| jd | 0    | 1     | 2     | 3     | 4    | 5      | 6      |
|----|------|-------|-------|-------|------|--------|--------|
|    | SCLK | PWM r | PWM g | PWM b | CS_n | MOSI x | MOSI y |

## Timing

All logic runs on one 50 MHz clock, which is the RMII reference clock, with a
synchronous active-high reset.

| path | clocks |
|---|---|
| RMII receive / transmit | 1 dibit per clock = 100 Mbit/s |
| doorbell after the clock edge that takes the last FCS dibit | 3 |
| `ip_ok` after the doorbell (20-byte header) | header length + 2 = 22 |
| first `netout` word after `ip_ok`, no UDP checksum | 2 |
| first `netout` word after `ip_ok`, with UDP checksum | 12 + UDP length + 3 |
| ARP reply rung after the request's doorbell (transmitter idle) | 2 |
| one point drawn | max(`POINT_CLKS`, 2·16·`SPI_HALF` + 3) = 2048 (24.4 k points/s) |
| minimum frame on the wire, one point per packet | 336 (149 k points/s) |

## What is specified and what was chosen here

These parts follow the source design:

- the partition into blocks and the names of the signals between them;
- the CRC32-BZIP2 FCS engines;
- the byte-register receive buffer with a doorbell;
- the one-entry ARP table and the echo service;
- the two 64-bit framebuffer banks and the swap that saves the end address
  and toggles `bram_select`;
- the 64-bit point format and its command codes;
- SPI to 16-bit DACs, and PWM for the lasers;
- the `jd` pin assignment.

The IPv4 and UDP blocks are only named in the source design. They were built
here from RFC 791, RFC 768 and RFC 1071, and their firewall rules are this
design's own. The following are this design's own choices:

- `ETH_MTU` = 1518;
- the bank depth of 4096;
- the echo EtherType;
- the addresses and the port;
- the SPI mode and rate, and the point rate (`POINT_CLKS`);
- the PWM period;
- redrawing a frame until the next swap;
- applying the colour after the DAC words;
- the payload staging memory in `udp_rx`, and dropping echoes while the
  transmitter is busy, both forced by the single receive buffer;
- the holding register that follows RMII's end-of-carrier signalling;
- every handshake not named above.

Departures and limits:

- **Point input.** One block diagram of the source design has the display
  controller read the receive buffer directly; another feeds it from the UDP
  block. This RTL uses the UDP block's `netout` words.
- **Link speed.** Only 100 Mbit/s is supported. RMII's 10 Mbit/s mode, in
  which each dibit is repeated ten times, is not.
- **Single buffers.** There is one receive buffer and one transmit buffer.
  An echo that arrives while the transmitter is busy is dropped. An ARP
  request that arrives while a reply is still pending gets no reply, although
  the table is still updated.
- **PHY configuration.** The PHY's management registers (MDIO) are not
  driven.
- **No transmit side for IP.** Nothing sends IPv4 or UDP. Only ARP replies and
  echoes are transmitted.
- **Framebuffer size.** The 4096-point bank size is a guess. An edge image
  with more points than that needs a larger `DEPTH`.

## Files

- `rtl/netpkg.sv`: shared constants and `point_t`.
- `rtl/laser_projector.sv`: top level, the network stack plus the display
  controller.
- `rtl/netstack.sv`: the network offload engine.
- Inside `netstack`: `crc32_bzip2`, `mac_rx`, `mac_rcv_if`, `mac_tx`,
  `mac_tx_if`, `arp_table`, `arp_echo`, `inet_checksum`, `ipv4_rx`,
  `udp_rx`.
- Inside `display_controller`: `bram_bank`, `spi`, `pwm`.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_eth_pkg.sv`: independent reference models for the testbenches. It
  provides a bit-reflected CRC-32, a word-sum Internet checksum, and builders
  for Ethernet, ARP, IPv4 and UDP frames.

`tb_laser_projector` runs the whole design at its default sizes. It performs:

- ARP, including a reply that waits for the transmitter;
- an echo;
- rejection of a frame with a bad FCS;
- drops for a foreign IP address and a bad UDP checksum;
- two frames sent as datagrams, checked point by point on the decoded SPI
  pins, with a redraw and a swap during drawing;
- a PWM duty check;
- a 4104-point frame that overflows a bank;
- an empty frame.

It counts each of these mechanisms and fails if one never happened. It runs
in about 10 s.

`tb_stream_workload` runs the streaming case at default sizes. A trajectory
on a 512x512 grid, made of a square and a circle outline, is scaled to the
16-bit DAC range. It is sent one point per datagram, with UDP checksums. Each
frame is padded to the Ethernet minimum and sent back to back at line rate.
The test checks that all 380 points are accepted at 336 clocks each with none
lost, and that the first 40 are drawn in order. A second phase fills a whole
bank with 4096 points in maximum-size datagrams sent back to back. That is 95
Mbit/s of point data. It checks every word and the drawing of the new frame.

`tb_fuzz` sends 500 random frames to the whole design, about half of them
damaged. The frames are datagrams, ARP packets, echo frames and random bytes.
Damage means flipped header bits, a cut-short frame or extra bytes. All of
them carry a good FCS. An independent model in the testbench predicts three
things from the final bytes:

- the point words that must come out of the UDP block;
- the ARP reply or echo that must be sent, checked byte for byte;
- what the ARP table must hold afterwards.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/netpkg.sv tb/tb_eth_pkg.sv rtl/*.sv tb/tb_laser_projector.sv \
    --top-module tb_laser_projector
./obj_dir/Vtb_laser_projector
```

Any other testbench builds the same way: change the last file and the
`--top-module`. Each testbench prints `TB_RESULT checks=N failures=M` and
stops on its own. It also has a cycle watchdog that counts a failure if the
test hangs. Verilator has only two states, so everything that is read is
reset. The framebuffer and packet buffers are not reset, and their contents
are not read before they are written.
