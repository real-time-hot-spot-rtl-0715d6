# Real-time hot spot detector for infrared video

This is synthesizable SystemVerilog for an FPGA that watches the video of an infrared
camera and reports every hot region ("hot spot", e.g. an ember in a forest fire) in
each frame. For each hot spot it reports the bounding box, the sums of the X and Y
coordinates (the centre of mass is sum / count) and the pixel count. The
results go out as UDP datagrams. The design follows the architecture published by
Pedre, Stoliar and Borensztein in "Real Time Hot Spot Detection Using FPGA". This
implementation is not by those authors. Where it had to fill in details, it says so
below.

The main idea is to label connected regions **while the pixels stream in**, without
storing the image. Every pixel is classified, labelled, and folded into the record of
its hot spot within one pixel clock. The only state kept is:

* one hot spot id per pixel of the previous line (the list **L**), and
* one record per hot spot.

So a frame's results are complete a few clocks after its last pixel arrives, however
large the image is. Results are sent over the network while the next frame is being
processed.

```
 BT.656 bytes ──► raw_generator ──► classifier ──► raw_processing ──► hotspot_reconstructor
 (27 MHz)         luma + (x,y)      hot / cold      list L, decides      read id1,id2 / merge /
                                       ▲            new/add/unify         write id1
                                       │ threshold                              │
                                       │                                        ▼
                               cfg_sync (CDC)                          hotspot_memory
                                       ▲                              (double buffer)
 pixel clock domain                    │                                        │
 ──────────────────────────────────────┼──────────────── result_scanner ◄───────┘
 MAC clock domain                      │                       │ cdc_fifo
                                 app_config ◄── rx bytes        ▼
                                                     udp_packet_generator ──► tx bytes
 digitizer_config (I2C to the SAA7113)   phy_config (MDIO to the Ethernet PHY)
```

## Labelling on the fly: the list L (`raw_processing`, `list_record`)

Pixels arrive in raster order. A hot pixel belongs to the same hot spot as its left
neighbour and its upper neighbour, if those are hot (4-connectivity). To know the
upper neighbour's hot spot without storing the image, the design keeps the ids of the
last `IM_WIDTH` pixels in a shift chain of `IM_WIDTH` records:

* record 0 holds the id of the **left** neighbour (the pixel pushed last);
* record `IM_WIDTH-1` holds the id of the **upper** neighbour (pushed one line ago);
* each pixel pushes its own id into record 0, every record moves one place, and the
  oldest id drops out.

Id 0 means "cold". Given the left id `l` and the upper id `u` of a hot pixel:

| l, u                        | operation | pixel gets | effect                                 |
|-----------------------------|-----------|------------|----------------------------------------|
| both 0                      | NEW       | next free id | a new hot spot is opened             |
| one 0, or `l == u`          | ADD       | the non-zero id | the pixel joins that hot spot     |
| both non-zero and different | UNIFY     | `min(l,u)` | `max(l,u)` is absorbed into `min(l,u)` |

A unification must also relabel every copy of the absorbed id still held in L, and it
must do so in the same clock. Otherwise a later pixel of the next line would see the
stale id. Each record therefore has its own comparator and multiplexer
(`list_record`). While a unification is in progress, a record that holds the absorbed
id passes the surviving id on to the next record instead of its own. The shift and
the relabelling then happen in one step. The cost is `IM_WIDTH` × (an 8-bit
register, an 8-bit comparator and an 8-bit multiplexer). This is the dominant logic
cost of the design, and it grows linearly with the image width.

Example (a U shape): the two arms start in line 0 and get ids 1 and 2. In the line
where the bottom of the U connects them, the pixel that touches arm 2 from the left
(`l = 1`, `u = 2`) issues UNIFY(1, 2). From then on every 2 in L reads 1. Record 2 is
marked invalid, and its statistics are added to record 1.

Choices of this implementation, all documented in the module headers:

* Ids are handed out in increasing order from 1 in every frame, and are not reused
  within a frame. An 8-bit id therefore names at most **255** hot spots per frame. A
  U-shaped region uses two ids even though only one survives.
* When the ids run out, a further new hot spot is dropped: its pixel is treated as
  cold. The frame is flagged as overflowed (flag bit in the datagrams, `hs_overflow`
  pulse on the top).
* The left neighbour is ignored in column 0, and the upper neighbour in line 0. L is
  never cleared: stale ids are never consulted.
* When two ids meet, the smaller one survives, whichever side it comes from. As a
  result, the surviving ids of a frame are in the order of each hot spot's first
  pixel in raster order.

`raw_processing` registers its decision. Each command (`cmd_op`, `cmd_id1` =
survivor, `cmd_id2` = absorbed, `cmd_x`, `cmd_y`) is valid one clock after its pixel.

## Hot spot records (`hotspot_reconstructor`, `hotspot_memory`)

A record is `{max_x, min_x, sum_x, max_y, min_y, sum_y, cnt}`. For every command, the
reconstructor reads the records of `id1` and `id2` combinationally, computes the
merged record and writes it to `id1` at the clock edge:

```
max_x = max(X, A.max_x, B.max_x)    min_x = min(X, A.min_x, B.min_x)
sum_x = X + A.sum_x + B.sum_x       cnt   = 1 + A.cnt + B.cnt       (Y likewise)
A = record id1, or neutral for NEW          B = record id2 for UNIFY, else neutral
neutral: max 0, min all ones, sums and count 0
```

Field widths follow from the frame size:

* X and Y: `clog2(IM_WIDTH)` and `clog2(IM_HEIGHT)` bits.
* Count: `clog2(W*H+1)` bits.
* Sums: the coordinate width plus the count width, so they cannot overflow.

At 512 × 256 a record is 105 bits. The original sizing formula gives narrower sums
(`2·log2(width) − 1` bits, 82 bits per record). Those overflow for a hot spot of a few
hundred pixels, so the wider fields were kept.

`hotspot_memory` has two banks of `MAX_HOTSPOTS` records:

* The **current** bank takes the updates of the frame being segmented. It has two
  asynchronous reads and one write, so read-modify-write fits in one pixel clock.
* The **previous** bank holds the final results of the last frame.

A valid bit per record is set by NEW and cleared by UNIFY (for `id2`). The banks swap
with the write of the last pixel of a frame. In that same clock, all valid bits of
the new current bank are cleared, so old record contents never need erasing. Each
bank also counts its valid records and keeps the frame's overflow flag. Records are
written as a memory array and can map to block RAM. The current-side reads are
asynchronous, so on an FPGA they need distributed RAM or a RAM clocked faster than
the pixel clock.

## Timing

* BT.656 carries a luma sample every second byte. A pixel therefore arrives at most
  every second 27 MHz clock. The pipeline itself accepts one pixel per clock.
* From the clock edge that samples the last luma byte of a field, `frame_done`
  (results final, banks swapped) is high four clocks later:
  * raw generator register;
  * classifier register;
  * labelling register;
  * record write and swap.

  The end-to-end testbenches check this latency, and it does not depend on the
  image size.
* After a swap, `result_scanner` reads ids 1 … `MAX_HOTSPOTS-1` of the previous
  bank, one per clock, and queues a frame header and the valid records. This takes
  about `MAX_HOTSPOTS` clocks, far less than a frame.

## Crossing to the network clock (`result_scanner`, `cdc_fifo`)

The results cross from the pixel clock to the MAC clock in `cdc_fifo`, a dual-clock
FIFO with Gray-coded pointers. A frame is queued only if the FIFO has room for all of
it (header + valid records). Otherwise the whole frame is skipped and
`frames_dropped` counts it, so a half-sent frame never occurs. With the default
512-entry FIFO this happens only if the network side stalls for more than a frame.

## Output datagrams (`udp_packet_generator`)

Each frame is sent as `ceil(n / HS_PER_PKT)` datagrams, or one datagram when it has
no hot spots. A datagram is a complete Ethernet II frame, without preamble and FCS
(the MAC adds those). It is handed to the MAC on a byte stream `tx_data/tx_valid/
tx_last` with `tx_ready` back-pressure. A datagram starts only when all its records
are in the FIFO, so `tx_valid` never drops inside a datagram. Multi-byte fields are
big-endian.

| bytes  | content |
|--------|---------|
| 0–13   | destination MAC, source MAC, EtherType 0x0800 |
| 14–33  | IPv4: 0x45, total length, identification (datagram counter), DF, TTL 64, protocol 17, header checksum, source IP, destination IP |
| 34–41  | UDP: source port, destination port, length, checksum 0 |
| 42–43  | frame number (counts every completed frame, including skipped ones) |
| 44–45  | number of hot spots in the frame |
| 46     | index of this datagram within the frame |
| 47     | records in this datagram |
| 48     | flags: bit 0 = ids ran out in this frame |
| 49     | 0 |
| 50+20k | record k: max X, min X, max Y, min Y (2 bytes each), sum X, sum Y, count (4 bytes each) |

## Run-time configuration (`app_config`, `cfg_sync`)

Datagrams received for the own IP address on UDP port `CFG_PORT` (default 5000)
carry register writes. Each write is 5 bytes: the register number, then a 32-bit
value, big-endian.

| register | setting |
|----------|---------|
| 0x00 | classification threshold (low 8 bits); a pixel is hot when `value >= threshold` |
| 0x01 | destination IPv4 address of the results |
| 0x02 | destination UDP port (low 16 bits) |
| 0x03 | destination MAC address bits 47..32 |
| 0x04 | destination MAC address bits 31..0 |

`app_config` assumes IPv4 headers without options, and frames whose FCS has already
been checked by the MAC. The threshold moves to the pixel clock through `cfg_sync`, a
toggle handshake. Change it during vertical blanking if a frame must be classified
with a single threshold.

## Board chip configuration (`digitizer_config`, `phy_config`)

After reset, two sequencers on `mac_clk` configure the chips outside the FPGA:

* `digitizer_config` writes a table of `{sub-address, value}` pairs to the SAA7113
  video digitiser over I2C. It uses open-drain outputs `scl_oe`/`sda_oe` and reads
  `sda_in`. It checks every acknowledge; a missing one sets `cfg_nack`.
* `phy_config` writes `{register, value}` pairs to the Ethernet PHY with clause 22
  MDIO frames (`mdc`, `mdio_o`, `mdio_oe`).

`cfg_done` rises when both tables have been sent. Both sequencers are complete, but
their default tables are only typical settings:

* for the digitiser: composite input, BT.656 output;
* for the PHY: restart auto-negotiation.

The original design does not give these values. Check the `TABLE` parameters against
the real board.

## Parameters

| parameter (top) | default | meaning |
|-----------------|---------|---------|
| `IM_WIDTH`, `IM_HEIGHT` | 512, 256 | processed window of each field, top-left aligned. The length of L is `IM_WIDTH`, which must equal the real line width and be ≤ 720 |
| `MAX_HOTSPOTS` | 256 | ids per frame, including the reserved id 0. Sets the id width and the memory depth |
| `FIFO_DEPTH` | 512 | result FIFO entries (power of two, ≥ `MAX_HOTSPOTS`) |
| `HS_PER_PKT` | 64 | records per datagram (keeps datagrams under 1500 bytes) |
| `SRC_MAC`, `SRC_IP`, `SRC_PORT` | 02:00:00:00:00:01, 192.168.0.2, 5001 | own addresses |
| `CFG_PORT`, `RST_THRESH` | 5000, 200 | configuration port, threshold after reset |
| `DIG_CLK_DIV`, `PHY_CLK_DIV` | 63, 10 | I2C and MDC dividers for a 25 MHz `mac_clk` |

Two modules dominate the size, and both scale as the original sizing equations
predict:

* **List L**: `IM_WIDTH × log2(MAX_HOTSPOTS)` flip-flops plus one comparator per
  record. At the defaults this is 4096 flip-flops and 512 comparators. It grows
  linearly with the image width.
* **Record memory**: `2 × MAX_HOTSPOTS × record width` bits. At the defaults this is
  2 × 256 × 105 bits. It grows linearly with the number of hot spots.

The defaults suit a 512 × 256 window of a PAL field. For a camera with another line
length, L must be rebuilt to that length. A 320 × 240 camera, for example, needs
`IM_WIDTH=320, IM_HEIGHT=240`, which gives 102-bit records. No timing analysis has
been run. The critical path is the single clock that covers the L update, the record
read, the arithmetic and the write-back.

## Departures from the original design

* **Id capacity.** Id 0 is reserved for "cold", so an 8-bit id gives 255 hot spots
  per frame, not 256.
* **Id exhaustion.** What happens when the ids run out is this design's own choice.
* **Record width.** Sum fields are wider than the original sizing formula, so they
  cannot overflow.
* **Memory reads.** The original keeps the records in block RAM. Here the
  current-bank reads are asynchronous, so that the whole read-modify-write takes one
  clock. On an FPGA they map to distributed RAM unless the reads are rearranged.
* **Unknown formats.** The original does not specify:
  * the BT.656 window placement and the use of luma as temperature;
  * the datagram format and the splitting into several datagrams;
  * the configuration message format and register map;
  * the FIFO organisation and the frame-skipping rule;
  * the MAC byte-stream handshake;
  * the chip configuration tables.

  All of these are this implementation's own.
* **Not included.** The Ethernet MAC (a hard block of the original FPGA), the
  physical-layer chip, the digitiser, the camera and the network. The top exposes
  the byte streams and buses that connect to them.

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_list_record` | load/enable and the relabelling multiplexer of one record |
| `tb_raw_processing` | every command against a column-indexed reference model of the labelling, including unifications and id exhaustion |
| `tb_hotspot_reconstructor` | merged record fields against integer arithmetic |
| `tb_hotspot_memory` | both banks, valid bits, counts and swaps against a model |
| `tb_raw_generator` | window extraction from a generated BT.656 stream |
| `tb_classifier` | threshold comparison |
| `tb_cdc_fifo` | ordering and level outputs across two unrelated clocks |
| `tb_udp_packet_generator` | every header field, checksum, record and datagram split, under back-pressure |
| `tb_app_config` | register writes, rejection of foreign frames, and random frames against a register model |
| `tb_digitizer_config`, `tb_phy_config` | I2C and MDIO bus models decode the writes, field by field, and check the bus timing |
| `tb_hotspot_top` | end to end at 32 × 16 pixels and 64 ids, 14 fields, with a flood-fill reference (see below) |
| `tb_hotspot_full` | the same at the default parameters, over three full PAL fields |
| `tb_hotspot_a320` | as `tb_hotspot_full`, built for a 320 × 240 camera (`IM_WIDTH=320, IM_HEIGHT=240`) |

`tb_hotspot_top` takes BT.656 in and parses UDP datagrams out. It also exercises:

* a threshold change sent over UDP;
* an id overflow (a checkerboard field);
* skipped frames while the network stalls;
* datagram splitting;
* the four-clock latency.

`tb_hotspot_full` runs with no parameter overrides, over three full PAL fields
(1728 bytes per line), and checks that both configuration sequencers finish.

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb rtl/hotspot_pkg.sv \
          tb/tb_hotspot_top.sv --top-module tb_hotspot_top -o sim
./obj_dir/sim
```

The package `rtl/hotspot_pkg.sv` must come first. `rtl/hotspot_defs.svh` holds the
record layout shared by the modules that move records. The full-size test takes a few
seconds.
