# Etherstream: a networked game rendered in 3D and streamed as H.261 video

Etherstream runs a small three-player shooting game entirely in FPGA logic.
Controller input arrives as UDP packets. Each picture of the game is rendered
as 3D cubes seen in perspective and compressed into an H.261 video stream.
The stream is then sent back over 100 Mb/s Ethernet as RTP packets, so any
ordinary RTP/H.261 player on the network can display the game. No processor
is involved. Every step, from parsing the controller packet to driving the
Ethernet PHY's RMII pins, is a state machine or a datapath in this RTL.

The design targets a 100 MHz system clock and a board with an RMII Ethernet
PHY. At that clock one picture goes from game state to the last Ethernet
frame in about 520,000 cycles (5.2 ms). That is well inside the 33 ms a
30 pictures/s stream allows.

## Signal path

```
 rx IPv4 bytes ─► receive_udp ─► shape_party (move_boxes, bullet_master, move_bullets)
                                      │ squares, bullets (updated on the 60 Hz game tick)
                                      ▼
                 vertex_shader (mesh_rom) ─► vertex_buffer ─► pixel_shader ─► framebuffer
                                                          (cross_product,     (176x144 x 4 bit)
                                                           dot_product,            │
                                                           intriangle,             ▼
                                                           own z-buffer)     h261_encoder (6 x dct8x8,
                                                                                   │        tcoeff_table)
                                                                                   ▼ 1 bit / cycle
 RMII txd/txen ◄─ byte_transmitter ◄─ mac_transmit (crc32_eth) ◄─ rtp_tx ◄─ packetizer (packet_buffer)

 MDC/MDIO ◄─► smi ─► led_autoneg
```

`etherstream_top` wires the blocks together. It also holds a small sequencer
that processes one picture at a time:

1. Start the vertex shader. It samples the game state.
2. When it is done, start the pixel shader.
3. When that is done, start the encoder.
4. After the encoder's `frame_end`, wait until the last packet has left the
   RTP transmitter and the encoder is idle.
5. Count the picture in `frames_sent` and go back to step 1.

The game logic runs independently on its own tick. A picture shows the state
at the moment the vertex shader started. A controller input therefore
reaches the video within about 27 ms: up to one game tick (16.7 ms), the
picture in progress, and the next picture (5.2 ms each).

Everything outside the FPGA logic appears as ports of the top:

- **Received packets.** There is no receive MAC. The top takes received IPv4
  packets as a byte stream (`rx_data`/`rx_valid`).
- **Transmit pins.** The RMII transmit pins (`rmii_txd`, `rmii_txen`) go
  straight to the PHY.
- **MDIO.** The pad is split into `mdio_o`, `mdio_oe` and `mdio_i`. The
  tri-state buffer belongs in the board wrapper.

## Controller packets and the game

**`receive_udp`** counts bytes through three phases: the 20-byte IPv4 header,
the 8-byte UDP header, and one payload byte per player.

- The two headers are stored and made available, but not checked. IPv4
  options are not supported.
- Each payload byte is `{0, move[2:0], 0, shoot[2:0]}`. Codes 1–4 mean up,
  down, left and right. Any other code means neutral.
- After the third player's byte, all six directions are updated at once and
  `valid_out` pulses for one cycle.

**`shape_party`** is the game. It is wiring around two stateful blocks.

**`move_boxes`** moves each player's 16×16 square by 2 pixels per game tick
and clamps it at the edges of the 176×144 field. The squares start at
(16,16), (144,16) and (80,112).

**`bullet_master`** runs one five-state FSM per bullet: NEUTRAL, UP, DOWN,
LEFT, RIGHT.

- A bullet in NEUTRAL sits on its owner's centre. On the next tick it takes
  the owner's shooting direction.
- **`move_bullets`** moves a flying bullet 4 pixels per tick. The bullet
  returns to NEUTRAL when it reaches the edge it is flying towards.
- **Hit test.** Every clock cycle, every flying bullet is tested against the
  other two squares. A hit means the bullet's centre point is inside the
  square.
- **What happens on a hit.** `dead` carries the hit player's number (1–3) for
  exactly one cycle. That pulse resets the squares to their start positions
  and recalls all bullets, so the game restarts. If two players are hit in
  the same cycle, the lower number is reported.

The game tick is a one-cycle enable. The top makes it by dividing the clock
by `GAME_DIV` = 1,666,667, which gives 60 Hz at 100 MHz.

## Turning the game into triangles: vertex shader

Every object becomes an axis-aligned cube. That gives six cubes (three
players, three bullets), each of 12 triangles, so 72 triangles and 216
vertices.

- **Geometry.** The camera sits at the origin and looks along +z. The game
  plane is placed at z = `Z0` = 256, centred on the camera axis. A player
  cube has half-size 8 and a bullet cube half-size 2.
- **Projection.** The screen is at distance `D` = 256:
  `sx = x·D/z + 88` and `sy = y·D/z + 72`. The offsets are half the screen
  width and height.
- **Mesh.** `mesh_rom` holds the cube's 12 triangles as corner signs, two per
  face. It flags every face except the one towards the camera as a side
  face.
- **Timing.** `vertex_shader` produces one vertex per clock, and the divide
  is combinational. It writes `vertex_t {sx, sy, x, y, z, color}` to
  `vertex_buffer` at `(object·12 + triangle)·3 + corner`. All 216 vertices
  are written in 216 cycles, and `done` comes with the last write.
- **Colour.** The colour is a 4-bit index: the object number plus one (1–3
  players, 4–6 bullets), with bit 3 set for side faces. Index 0 is the
  background.

The 3D position is kept next to the screen position because the pixel
shader needs it for depth.

## Pixel shader: rasterising with a depth test

This is the least obvious part of the design.

`pixel_shader` fills the framebuffer so that, at each pixel, the nearest
surface wins. It keeps its own depth buffer: a `framebuffer` instance with
16-bit words, 176×144 entries.

**Clearing.** A pass starts by clearing both buffers, one pixel per cycle:
colour 0 and the largest depth (0xFFFF). This takes 25,344 cycles.

**Per-triangle setup.** For each triangle the shader:

1. Reads the three vertices (one cycle of read latency each).
2. Forms the plane normal `n = (V1 − V0) × (V2 − V0)` with `cross_product`,
   using 3D coordinates.
3. Forms the numerator `O·n` with `dot_product`, where `O = V0` is the vector
   from the camera to a vertex on the plane. This is the same for every
   pixel of the triangle.
4. Finds the triangle's screen bounding box, clipped to the screen.

**Per-pixel work.** The shader then visits only the pixels of that box, one
per clock.

- **Coverage.** `intriangle` decides coverage from the signs of three edge
  functions. A pixel is inside when all three have the same sign, so either
  winding works and pixels on an edge count. Degenerate triangles (zero
  area) cover nothing.
- **Depth.** The ray through pixel (x, y) is `r = (x − 88, y − 72, D)`. The
  point where it meets the triangle's plane lies at `t = (O·n)/(r·n)` along
  it, so its z is `D·t`. With D = 256, the stored depth is
  `((O·n) << 8) / (r·n)`. That is the hit point's z in the same units as the
  vertices. It is saturated to 16 bits. A zero denominator (a plane seen
  edge-on) draws nothing.
- **Depth buffer pipeline.** The read for a pixel is issued in the cycle the
  pixel is visited. The compare happens one cycle later, and if the pixel is
  nearer, the depth and colour are written in that same cycle. Within one
  triangle every pixel is visited once. Between triangles the fetch and
  setup cycles separate the last write from the next read. So the two-stage
  pipeline never reads a location that still has a write pending.
- **Ties and culling.** Ties keep the earlier triangle, because the test is
  a strict `<`. Back faces are not culled. They are drawn and then lose the
  depth test.
- **Counters.** `drawn_pixels` and `hidden_pixels` count pixels that passed
  and failed the depth test.

**Cost.** A pass costs 25,344 clear cycles, plus a few setup cycles per
triangle, plus one cycle per bounding-box pixel. A typical game picture takes
about 40,000 cycles.

**Precision.** The normal's components need 27 bits, because coordinates are
12-bit signed. The products `O·n` and `r·n` need 41 bits. The divide is one
wide combinational divider, likely the longest combinational path in the
design (no timing analysis was run).

## H.261 encoder

`h261_encoder` codes the framebuffer as one H.261 intra picture in QCIF
format (176×144). It produces the bitstream one bit per clock on a
`bit_out`/`bit_valid`/`bit_ready` handshake. While `bit_ready` is low, the
code being sent is held and the state machine stops at its next code. The
load and transform of the next macroblock emit nothing, so they keep running
during a pause. A packet that drains while the next macroblock is being
transformed therefore costs the encoder no time.

**Bitstream layout** (all codes most significant bit first):

| element | bits | content |
|---|---|---|
| picture header | 32 | PSC `0000 0000 0000 0001 0000`, 5-bit temporal reference (counts pictures), PTYPE `000011` (QCIF, no high-resolution still image, spare bit 1), PEI `0` |
| GOB header, ×3 | 26 | GBSC `0000 0000 0000 0001`, GN 1, 3, 5, GQUANT = 8, GEI `0` |
| macroblock header, ×33 per GOB | 5 | MBA `1` (next macroblock), MTYPE `0001` (intra) |
| each of 6 blocks | 8 + AC + 2 | intra DC as 8-bit FLC, AC run/level codes, EOB `10` |

A picture therefore has 99 macroblocks. The encoder codes every one of them;
none is skipped.

**Macroblock timing.** Each macroblock takes three steps:

1. **Load (MB_LOAD, 384 cycles).** The 256 luma pixels and 2×64 chroma
   pixels are read from the framebuffer. Colour indices become Y, Cb and Cr
   through a fixed palette in `etherstream_pkg`. Side faces get half the
   luma. Chroma takes the top-left pixel of every 2×2 area.
2. **Transform (MB_DCT, 4,097 cycles).** Six `dct8x8` units run in parallel,
   one per block.
3. **Coding.** Each block's coefficients are read out in zig-zag order and
   coded.

**How each block is coded.**

- **DC.** The DC coefficient is divided by 8 and rounded. It is limited to
  1..254, and the value 128 is sent as `1111 1111`, as H.261 requires.
- **AC levels.** Each AC coefficient becomes a level: coefficient / (2·8),
  truncated towards zero and limited to ±127. A fixed quantiser of 8 is
  used throughout.
- **Run/level codes.** Zero levels extend the current run. Each nonzero
  level is sent as the `tcoeff_table` code for (run, |level|) followed by a
  sign bit. Pairs that have no short code take the 20-bit escape: `000001`,
  a 6-bit run and an 8-bit level.

**Emitter.** The encoder holds one code (up to 32 bits) at a time and shifts
it out. The state machine only advances once the emitter is empty. Without
output stalls, a macroblock costs 384 + 4,097 + (its coded length) +
(one cycle per zero coefficient scanned). A picture takes roughly 0.45 to
0.52 million cycles, depending on content.

**Other outputs.**

- `mb_end` pulses when a macroblock's last bit has been accepted.
  `frame_end` comes with the last one.
- At the start of a picture (state SAMPLE), the encoder latches `timestamp`.
  This is a counter of a 90.009 kHz clock, made by dividing 100 MHz by 1111.

**`dct8x8`** evaluates the defining double sum directly, one multiply-add
per clock, so 64 × 64 = 4,096 cycles per block. The basis products are
formed from a fixed-point cosine table with 13 fractional bits. The sum is
exact, and each output is rounded once. The result matches a real-valued DCT
to within ±1.

**`tcoeff_table`** is the H.261 TCOEFF short-code table as a combinational
case statement. It lists the common run/level pairs; every other pair takes
the escape, which is always a valid choice. Codes are right-aligned in a
20-bit field. The five top bits of that field are always zero: short codes
with their sign bit are at most 15 bits, and the escape begins `000001`.
Synthesis therefore reports them as constant outputs.

## Packetizer and flow control towards the network

`packetizer` cuts the bitstream into RTP payloads at macroblock boundaries.
It stores the encoder's bits in `packet_buffer`, a 12,000-bit, 1-bit-wide
block RAM.

**When a packet is cut.** At every `mb_end` it checks the buffered size. A
packet is cut when either of these holds:

- more than 2,048 bits are buffered, or
- the picture has ended. That packet carries the RTP marker bit.

**Sending a packet:**

1. Drop `bit_ready`, which holds the encoder's output.
2. Wait until `rtp_tx` reports idle.
3. Pulse `prepare_for_data` with the size in bits, the marker and the
   picture's timestamp.
4. Stream the buffered bits out.
5. Empty the buffer and release the encoder.

Lengths are needed up front because the IPv4 and UDP headers carry them, and
those headers are sent before the payload. That is why a whole packet is
buffered first.

**Worst-case packet size.** A packet can reach 2,047 buffered bits plus one
worst-case macroblock (6 × (8 + 63×20 + 2) = 7,620 bits) plus headers:
9,730 bits. That fits the 12,000-bit buffer and stays below a 1,500-byte
Ethernet payload.

**`rtp_tx`** sends the 40 header bytes (IPv4 20, UDP 8, RTP 12) most
significant byte first, then the payload bytes.

- **Header contents.** The headers are built combinationally from the stored
  size, marker and timestamp. The IPv4 and UDP checksums are zero. IPv4 has
  no options, TTL 64, and the "don't fragment" flag set.
- **RTP fields.** Version 2, payload type 31 (H.261), a fixed SSRC. The
  sequence number is seeded from a free-running LFSR on the first packet
  after reset and incremented after every packet.
- **Payload packing.** Payload bits are packed most significant bit first.
  A last partial byte is padded with zeros.
- **Buffering.** One byte is held ahead, so payload bits flow in while the
  header is still being sent.
- **Addresses and ports.** The IP addresses (192.168.1.2 → 192.168.1.1) and
  ports (5004) are parameters.

**Back-pressure.** The handshakes are ready/valid all the way down:

- The RMII serialiser takes one byte every 8 cycles.
- So the MAC waits for it.
- So `rtp_tx` waits for the MAC.
- So the packetizer waits for `rtp_tx`.
- While a packet drains, the encoder's output is held.

## Ethernet transmit

**`mac_transmit`** frames each packet as follows:

1. 7 preamble bytes `0x55` and the delimiter `0xD5`.
2. Destination MAC (broadcast by default), source MAC, and EtherType 0x0800.
3. The IPv4 bytes, zero-padded to the 46-byte minimum.
4. The FCS.
5. An inter-frame gap of 96 cycles.

**`crc32_eth`** updates the FCS a byte per cycle. It uses a 256-entry table
of the reflected polynomial 0xEDB88320, and the table is computed at
elaboration. The FCS is sent complemented, least significant byte first.

**`byte_transmitter`** turns each byte into four RMII dibits, least
significant pair first. It holds each dibit for two clocks: 50 MHz RMII from
the 100 MHz clock. `txen` stays high across a frame.

## PHY management

**`smi`** is a clause-22 MDIO master:

- MDC is 2.5 MHz (the clock divided by 40).
- Frames are 32 preamble ones, `01`, the opcode, PHY address 1, the register
  address, the turnaround, and 16 data bits.
- MDIO changes after the falling edge of MDC and is sampled on the rising
  edge.

It accepts explicit read and write requests. When idle it reads the basic
status register every `POLL_CYCLES` (100,000) clocks and shows bit 5
(auto-negotiation complete) on `led_autoneg`.

## Parameters and sizes

| where | parameter | default | meaning |
|---|---|---|---|
| `etherstream_pkg` | `SCREEN_W`, `SCREEN_H` | 176, 144 | QCIF picture and game field |
| `etherstream_pkg` | `NUM_PLAYERS`, `BOX_SIZE` | 3, 16 | players and square size |
| `etherstream_top` | `GAME_DIV` | 1,666,667 | clocks per game tick (60 Hz) |
| `etherstream_top` | `POLL_CYCLES` | 100,000 | PHY status poll period |
| `shape_party` | `BOX_MOVE_AMT`, `BULLET_MOVE_AMT` | 2, 4 | pixels per tick |
| `vertex_shader` | `Z0`, `D`, `PLAYER_HALF`, `BULLET_HALF` | 256, 256, 8, 2 | scene geometry |
| `h261_encoder` | `QUANT`, `TS_DIV` | 8, 1111 | quantiser, timestamp divider |
| `packetizer` | `THRESHOLD`, `DEPTH` | 2048, 12000 | packet cut size, buffer bits |
| `mac_transmit` | `DST_MAC`, `SRC_MAC`, `IFG_CYCLES` | broadcast, 02:00:00:00:00:01, 96 | framing |
| `smi` | `MDC_HALF`, `PHY_ADDR` | 20, 1 | MDC rate, PHY address |

Block RAM use: 101,376 bits (picture), 405,504 bits (depth), 12,000 bits
(packet), 13,824 bits (vertices). The DCT working memories and the CRC table
add a few kilobits.

## How far it follows the original project, and where it departs

The original project report describes the blocks, their state machines and
several key numbers:

- the byte formats,
- the QCIF size,
- the 2,048-bit packet threshold and the 12,000-bit buffer,
- the 1111 timestamp divider,
- six DCT units of about 4,096 cycles.

Much of the rest is this design's own choice.

**Departures:**

- **DCT arithmetic.** The DCT is fixed-point, not double-precision floating
  point built from vendor IP. It is integrated into the encoder.
- **Depth buffer.** The report names depth ordering as an open problem. Here
  it is solved with a pipelined depth buffer.
- **Vertex shader speed.** The vertex shader is faster than the report's:
  2.16 µs instead of 3.5 µs.
- **Bit order.** Within a byte, payload bits are placed most significant bit
  first, so the H.261 stream reaches the receiver in order. The report
  describes an ordering by least significant bit first, which matches the
  order the bits leave on the wire.

**The design's own choices:**

- all scene geometry,
- the palette,
- the quantiser,
- the game speeds and start positions,
- the hit rule,
- the addresses and ports,
- the sequencing of the picture loop.

**Not included:**

- **Receive path.** There is no Ethernet receive MAC; received packets enter
  as bytes. There is no ARP and there are no checksums on either path.
- **H.261 coding.** Intra coding only: no motion compensation, no
  inter-frame coding, no rate control. Every picture is coded in full.
- **Off-chip parts.** The Bluetooth controllers, the laptop that forwards
  their input, and the playback machine are outside the FPGA and not part of
  this RTL.

**How far it can be trusted.** Every block has a self-checking testbench.
The whole chain is checked end to end down to decoded Ethernet frames.
The encoder's bitstream is decoded and compared level by level in its own
testbench. End to end, the stream is checked by its start codes, lengths and
counts. It has not been played back by an independent H.261 decoder.

## Simulation

All files are plain SystemVerilog. The package `rtl/etherstream_pkg.sv` must
be compiled first. Any testbench runs with Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/etherstream_pkg.sv tb/tb_pixel_shader.sv \
          --top-module tb_pixel_shader -Mdir obj_tb_pixel_shader
./obj_tb_pixel_shader/Vtb_pixel_shader
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Expected values are computed independently in the testbench; they are not
read back from the design.

**Testbenches with notable content:**

- **`tb_etherstream_top`** runs the whole design with `GAME_DIV` = 1000 and
  `POLL_CYCLES` = 3000 for two pictures. It:
  - sends controller packets;
  - models the PHY's management interface (`phy_mdio_model`);
  - receives every frame with `rmii_monitor`. The monitor checks preamble,
    FCS, IPv4/UDP/RTP headers, consecutive sequence numbers, timestamps, and
    the picture start code at the start of each picture's first packet.

  The testbench counts each mechanism and fails any that never occurred:
  - decoded commands and game ticks;
  - a hit with its one-cycle `dead`;
  - a square held at the edge;
  - depth-test rejections;
  - the encoder's output held by the packetizer;
  - MAC back-pressure;
  - packets above the threshold;
  - one marked packet per picture;
  - the auto-negotiation LED.
- **`tb_etherstream_full`** runs the top with no parameter changes through
  one complete picture, about 520,000 cycles. It checks that the picture
  fits in 1/30 s.
- **`tb_pixel_shader`** compares every pixel of a scene with a reference
  rasteriser. The scene has overlapping squares at two depths, a clipped
  triangle and degenerate triangles.
- **`tb_h261_encoder`** codes two pictures, with random stalls on the
  output.
  - The first has flat macroblocks. Its exact bit count is checked
    (32 + 3·26 + 99·65 bits), along with every header, every DC value, the
    timestamp, and at least 4,097 cycles per macroblock.
  - The second is textured: noise, stripes, checkers and single dots. Its
    bitstream is decoded in the testbench with its own TCOEFF table,
    escape and zig-zag order. Every one of the 38,016 levels is compared
    with levels from a real-valued DCT of the same pixels. About 99% match
    exactly, and none differs by more than one, which is the fixed-point
    DCT's rounding.
- **`tb_workload_noise`** is the heaviest video load: the encoder and the
  packetizer at full size code a picture of random colour indices. The
  transmitter is modelled at Ethernet speed. The picture comes to about
  253,000 bits in 99 packets, the largest 2,794 bits. Coding and sending
  take about 731,000 cycles (7.3 ms), so even this picture fits 30 pictures
  per second.
- **`tb_dct8x8`** checks the 4,097-cycle latency and accuracy against a
  real-valued DCT.

## Files

- **`rtl/`** has one module or package per file, named after it.
  `etherstream_top.sv` is the top. `etherstream_pkg.sv` holds the shared
  types, sizes and palette.
- **`tb/`** has one testbench per block, `tb_<module>.sv`, plus the two
  end-to-end testbenches, the noise workload testbench and two helpers,
  `rmii_monitor.sv` and `phy_mdio_model.sv`.
