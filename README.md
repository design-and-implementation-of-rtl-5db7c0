# Row accelerators for an MHP video/graphics pipeline

A DVB-MHP set-top box has to show three planes on one screen: a background, a
video plane (decoded MPEG video scaled and positioned by the application), and
a graphics plane (Java AWT components with per-pixel alpha). When the whole
pipeline runs in software on an embedded PowerPC 405, two steps take most of
the time. One is scaling the decoded video, for example QCIF 176×144, to the
640×480 screen. The other is blending the full-screen graphics plane over the
video with the Porter-Duff SRC_OVER rule. This RTL moves both steps into two
small FPGA peripherals on the PowerPC's Processor Local Bus (PLB):

* **Composition device**: composes one 640-pixel row of graphics over one row of video.
* **Scaling device**: scales one video row to any destination width by pixel
  replication. It also reports which destination rows that source row covers.

Both devices work the same way. Software copies one row of pixels into an
on-chip buffer of eight block RAMs, writes a few parameters, and writes the
start code `0x0A`. The device works inside its buffer, writing results to a
third buffer region. Software polls a done flag and copies the result row out.
Neither device ever touches system memory. The bus master moves the data: the
processor, or the IPIF DMA service if there is room for it in the FPGA.

The two devices are independent. `mhp_accel_top` puts them side by side, as
they sit in one FPGA image.

## Where the RTL stops

A Xilinx EDK peripheral is made of two parts. The vendor's IPIF (IP
interface) speaks the PLB protocol. The user logic sits behind it. This RTL is
the user logic. Its ports are the IPIF-to-user-logic signals, the IPIC, named
the way the IPIF names them (`Bus2IP_*` and `IP2Bus_*`). The following are
outside the RTL and appear only as the ports they would drive:

* the PLB IPIF itself (slave attachment, byte steering, DMA service);
* the PLB and its arbiter;
* the PowerPC;
* the DDR memory;
* the TFT-LCD controller.

Each device uses two IPIF services:

* **software registers**: one chip-enable bit per 32-bit register, on
  `Bus2IP_WrCE` and `Bus2IP_RdCE`;
* **one address range**: `Bus2IP_ArCS`, through which the data buffer is read
  and written.

## Bit and byte numbering

PowerPC and PLB documents number bits from the MSB: bit 0 is the most
significant bit. The register descriptions below use that numbering, because
software is written against it. In the SystemVerilog, vectors are the usual
`[N-1:0]`, so PLB bit *b* of a 32-bit register is `[31-b]`. Memory is
big-endian: the byte at the lowest address of a 64-bit word is bits `63:56`,
and its byte enable is `BE[7]`.

* **Chip enables.** These are numbered the PLB way as well. Register *k* of *N*
  is selected by `CE[N-1-k]`. With four registers, `CE = 4'b0010` selects the
  third one.
* **Registers.** A register occupies the upper half of the 64-bit data bus,
  `Bus2IP_Data[63:32]` with `Bus2IP_BE[7:4]`. That is where a 32-bit store to
  the register's base address lands.
* **Pixels.** A pixel is 32 bits, alpha first: `{A, R, G, B}` (`mhp_pkg::argb_t`).
  A 64-bit buffer word holds two pixels. Pixel 2*n* is in bits `63:32` of word
  *n*, and pixel 2*n*+1 is in bits `31:0`.

### Buffer addressing

The buffer is 2048 words of 64 bits, built from eight 8-bit × 2k block RAMs
side by side (`data_buffer`, `bram_lane`). The word address is taken from
byte-address bits `14:4` (PowerPC bits 17..27). Each buffer word therefore
sits at a 16-byte stride:

| bus address (offset in range) | buffer word | byte enables for a 32-bit write |
|---|---|---|
| `0x0010`–`0x001F` | 1 | — |
| `0x0110` | `0x11` | `1111_0000` |
| `0x0114` | `0x11` | `0000_1111` |

Address bits 3:0 are ignored, so offsets 8..15 of each 16-byte block alias
offsets 0..7. Software should write each word at its 16-byte-aligned address,
or at that address + 4 for the second pixel. The parameter `AR_ADDR_LSB`
(default 4) moves the slice if a denser map is wanted.

## The row protocol and the control word

Register 0 of both devices has the same layout (`mhp_pkg::ctrl_reg_t`):

| PLB bits | SV bits | field | access |
|---|---|---|---|
| 0..7 | 31:24 | start | R/W |
| 8 | 23 | busy | R |
| 9 | 22 | done | R |
| 10..21 | 21:10 | reserved, read 0 | — |
| 22..31 | 9:0 | width (composer) / src_W (scaler), in pixels | R/W |

The start byte controls when a row runs:

* Any value other than `0x0A` written to it is simply stored. Software can use
  this to load the width first.
* The value `0x0A` launches the row as soon as the device is idle, normally in
  the next cycle. The byte then reads back as `0x00`.
* The busy/done flags read `00` after reset, `10` while the row runs and `01`
  once it is finished.

While a row runs, the device owns its buffer. A bus access to the address
range is held, with no acknowledge, until the row ends, and then completes
normally. Register reads are not held, so polling works.

### IPIC handshake

The master holds a request (a CE bit, or `Bus2IP_ArCS` with `Bus2IP_RNW`)
until it sees the acknowledge. The acknowledge is a one-cycle pulse on
`IP2Bus_WrAck` or `IP2Bus_RdAck` in the cycle after the device takes the
access. The master drops the request in the following cycle. Read data
(`IP2Bus_Data[63:32]`, or `IP2Bus_ArData`) is valid in the acknowledge cycle.
An uncontended access therefore takes two cycles. `ipic_slave` asserts the bus
rules:

* at most one CE bit is set;
* a read and a write never happen at once;
* a register access and a buffer access never happen at once.

## Composition device (`compose_ip`, `compose_core`, `alpha_blend3`)

**Buffer map** (word addresses):

| words | contents |
|---|---|
| 0–511 | graphics row |
| 512–1023 | video row |
| 1024–2047 | results |

A 640-pixel row fills 320 words of each region.

**The blend.** SRC_OVER gives `result = α·graphics + (1−α)·video` for each
channel. An MHP terminal must support at least three levels of transparency:
opaque, fully transparent, and about 30 %. Only those three levels are built,
which removes the multiplier:

| graphics alpha | result |
|---|---|
| `0xFF` | the graphics pixel |
| `0x00` | the video pixel |
| anything else | `g>>2 + g>>5 + g>>6 + v>>1 + v>>3 + v>>4 + v>>6`, per byte |

The last line is `0.296875·g + 0.703125·v`, with each shifted term truncated
separately. The sum therefore never exceeds 255, and it lies within 7 of
`0.3g + 0.7v`. The same per-byte rule is applied to the alpha byte. The result
alpha is not used for display.

**FSMD and timing.** `IDLE → GET_DATA (2 cycles) → COM (1 cycle) →` next pixel.

* In the first GET_DATA cycle, the graphics word address goes to buffer port A
  and the video word address to port B. The dual-port RAM reads both at once.
* In the second cycle, the two words arrive and are registered.
* In COM, the blended pixel is written through port B with the byte enables of
  its half word.

A row of *W* pixels takes exactly 3·*W* cycles from the cycle that launches it.
With the start register, that is 3·*W*+1 cycles after the start write is
acknowledged: 1921 cycles for a 640-pixel row. Port A belongs to the bus while
the composer is idle and to the composer while it is busy.

## Scaling device (`scale_ip`, `scale_core`)

**Buffer map:**

| words | contents |
|---|---|
| 0–1023 | source row |
| 1024–2047 | scaled row (up to 2048 pixels) |

**Fixed-point ratio.** Division is left to software. It writes
`W_ratio = dst_W/src_W · 256` (and likewise `H_ratio`) as 16-bit numbers with
8 fraction bits. For source pixel `src_x` the hardware computes
`d_x_max = ((src_x+1) · W_ratio) >> 8`. It copies the pixel to destination
indices `d_x_min … d_x_max−1`, then sets `d_x_min = d_x_max`. When an interval
is empty, the pixel is dropped, so the same circuit also downscales; 1/2
scaling is the case MHP requires.

**FSMD and timing.** `IDLE → COM_ADDR (1 cycle) → MOVE_DATA (1 cycle per
destination pixel, at least 1) →` next source pixel.

* COM_ADDR computes the bound and reads the source word.
* MOVE_DATA writes one replicated pixel per cycle through port B.

A row takes `src_W + Σ max(1, copies)` cycles. For an upscale that is
`src_W + dst_W`: 816 cycles for 176 → 640. Destination indices are clamped to
the 2048-pixel destination region.

**Rounding.** A ratio rounded down can leave the last destination pixel
unwritten. For example, ⌊640·256/176⌋ = 930 covers only 639 pixels. Software
that must fill the row should round the ratio up (931).

**The vertical direction** works on the same principle. At launch the device
also computes the destination row range of source row `src_y`:
`[ (src_y·H_ratio)>>8, ((src_y+1)·H_ratio)>>8 )`. It returns the range in
register 3. Software copies the scaled row to each row of that range. For
QCIF → 480 lines, each source row covers three or four screen rows.

**Registers** (PLB bit numbering):

| reg | bits | field |
|---|---|---|
| 0 | see control word | start, busy, done, src_W |
| 1 | 0..15 / 16..31 | H_ratio / W_ratio |
| 2 | 22..31 | src_y |
| 3 (R) | 4..15 / 20..31 | d_y_min / d_y_max |

## Choices made in this RTL

These points are either the design's own choices or readings of an
underspecified original:

* **Cycle split of the composer.** The three cycles per pixel come from
  "address, then data two cycles later, then one compute/write cycle".
* **Flag encoding.** The finished state is busy=0, done=1 (`01`).
* **Scaler layout.** The scaler's buffer split, the placement of W_ratio in
  register 1, and all of H_ratio, src_y and register 3 are this design's own.
  The original names only the start/busy/done, src_W and W_ratio registers,
  and says only that the y dimension is scaled "similarly".
* **Intervals.** Destination intervals are half-open, `[d_x_min, d_x_max)`.
* **Stalls.** Bus accesses to the buffer wait while a device is busy.
* **IPIC details.** The IPIC acknowledge timing is simplified. `Bus2IP_RNW` is
  used for buffer reads and writes.
* **Block RAM model.** Both ports of each block RAM run on the single bus
  clock. `bram_lane` offers the block RAM's three write modes
  (`WRITE_MODE`: WRITE_FIRST, READ_FIRST, NO_CHANGE). The buffers use
  WRITE_FIRST, the device default. Parity, set/reset, output-register and
  cascade pins are not modelled.
* **Alpha byte.** The alpha byte is composed with the same rule as the colour
  bytes.

Known limits:

* `IP2Bus_Data[31:0]` is always zero, because the registers are 32 bits wide.
* The synthesis warnings about unused bits concern the low half of
  `Bus2IP_Data`, address bits outside the word slice, and reserved register
  bits. They are intended.

## Files

| file | contents |
|---|---|
| `rtl/mhp_pkg.sv` | shared types (pixel, control word), buffer geometry, start code |
| `rtl/bram_lane.sv` | 8-bit × 2k true dual-port block RAM, three write modes |
| `rtl/data_buffer.sv` | eight lanes → 64-bit buffer with byte enables |
| `rtl/alpha_blend3.sv` | three-level SRC_OVER datapath |
| `rtl/compose_core.sv` | composition FSMD |
| `rtl/scale_core.sv` | scaling FSMD |
| `rtl/ipic_slave.sv` | register strobes, buffer access, acknowledges, stall |
| `rtl/compose_ip.sv` | composition device (registers + buffer + core) |
| `rtl/scale_ip.sv` | scaling device |
| `rtl/mhp_accel_top.sv` | both devices side by side |
| `tb/ipic_bfm.sv` | IPIC bus-functional master (interface with tasks) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs. With
Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mhp_pkg.sv tb/tb_mhp_accel_top.sv --top-module tb_mhp_accel_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_mhp_accel_top` with any other `tb_<module>` to test one module.

* **`tb_mhp_accel_top`** runs one complete frame at the default sizes, in
  about 2 s:
  * the QCIF frame is scaled to 640×480 row by row, with the row ranges the
    device reports;
  * a 640×480 graphics plane is composed over the result: transparent
    background, a translucent panel, opaque menu items and an unscaled QCIF
    window;
  * meanwhile the scaler halves the frame.
* **It checks** every output pixel against references computed in the
  testbench (620,887 checks).
* **It counts** that each mechanism occurred: wrong start codes ignored, bus
  stalls on both devices, pixel replication, pixel dropping, row replication,
  and all three blend levels.
* **The module testbenches** check the cycle counts given above (3·*W*,
  `src_W + Σ max(1, copies)`, and the +1 of the start register), the flag
  sequence, byte-enable behaviour and the block RAM read semantics.

To try other sizes, change the testbench's row widths and ratios. The RTL
defaults are the full-size buffers and need no parameters.
