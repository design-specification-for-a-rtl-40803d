# Quad-monitor video adapter

This design shows one picture across four VGA monitors set up two by two, each monitor
showing one quarter of it. The picture can be moved over the four screens with a mouse. A
left click doubles its size and a second click restores it. A right click switches to
another stored picture. Because all four screens are timed by one counter pair, their sync
signals cannot drift apart. The picture is drawn without gaps, overlaps or shifts at the
monitor seams.

The logic is written for one FPGA between three external parts:

- an EEPROM that holds the pictures;
- an SRAM the pictures are read from during display;
- per monitor, either an ADV473-class RAMDAC (24-bit colour) or a simple 3-bit resistor DAC
  (one bit per colour).

A PS/2 mouse is the only input.

```
            EEPROM                SRAM
              |  ^                 ^  |
      rom_data|  |rom_addr   addr/we|  |rdata
              v  |                 |  v
  +-----------+--+-----------------+--+--------------------------------------+
  | eeprom_controller --writes--> sram_controller --tagged reads--+          |
  |                                   ^    ^                      |          |
  |                 vga_timing -------+    | pos/zoom/img         v          |
  |                      |                 |          4 x pixel_interp       |
  |                      |           mouse_driver             |              |
  |                      +--- hsync/vsync/blank ---> output register ----> 4 x VGA
  |  ramdac_ctrl ----> RAMDAC MPU bus                         (24-bit + 3-bit)
  +---------------------------------------------------------------------------+
```

## The canvas

The four monitors together form one canvas twice the VGA size in each direction: 1280 × 960
pixels. Monitor `m` (0..3) is column `m[0]` and row `m[1]` of the 2 × 2 arrangement. So pixel
`(h, v)` of monitor `m` is canvas pixel `(X, Y) = (m[0]·640 + h, m[1]·480 + v)`.

A stored picture is 640 × 480 pixels of 24-bit RGB. Its top-left corner is at canvas
position `(pos_x, pos_y)`.

- **Normal size:** the picture covers a quarter of the canvas and can sit anywhere on it.
  At the default centred position it covers a 320 × 240 corner of every monitor.
- **Enlarged:** the picture is 1280 × 960 and fills the canvas exactly. Each monitor then
  shows one quarter of the picture at full 640 × 480 resolution. The gaps between source
  pixels are filled by averaging.

Outside the picture the screens are black.

The mouse moves the corner one canvas pixel per mouse count. The corner is kept between 0
and (canvas − picture size). These limits change when the picture is enlarged, and the
position is clamped to the new limits at once. At the default sizes the enlarged picture can
only be at (0, 0). With a smaller `IMG_W`/`IMG_H` it can be moved while enlarged too.

## Four reads per pixel: the read schedule

This is the part that takes the most care to follow.

At the 25 MHz VGA pixel rate, four monitors need four pixels per pixel period. The system
clock `clk` therefore runs at 100 MHz, four times the pixel rate. A 2-bit slot counter
splits each pixel period into four cycles, and in slot `m` the SRAM is read for monitor `m`.
`pix_en` (slot 3) advances the timing counters.

At normal size the read is simply the source pixel under the scan position.

When the picture is enlarged, output column `rx` (relative to the picture) falls between
source columns `rx>>1` and `(rx+1)>>1`. An odd column is the mean of the two. Reading both
would need two reads per slot. Instead, every slot reads column `(rx+1)>>1`, and the
interpolator keeps the previous read of the same monitor, which is column `rx>>1`.

Rows work the same way. Every line reads source row `(ry+1)>>1`:

- On even rows that row is the output, and it is also written into a 640-pixel line buffer.
- On odd rows the output is the mean of the line buffer (row `ry>>1`) and the new row.

A pixel in an odd row and odd column is thus the mean of four source pixels. It is rounded
in two stages, each rounding halves up.

Both kinds of "previous" data must exist at the first pixel of a monitor. That pixel's left
neighbour lies on the monitor to its left, and its upper neighbour on the monitor above. So
the schedule adds two extra reads:

- **Column −1.** The last pixel period of every line (`hcount = H_TOTAL−1`) reads column −1
  of the next line. This loads the previous-pixel register.
- **Row −1.** The last blanking line of the frame reads row −1. This loads the line buffer.

For monitors in the left column or top row these extra reads fall outside the picture and
are ignored.

Each read carries a tag through the two-cycle SRAM path (`f_*` ports of `sram_controller`):

- the monitor number;
- whether the read lies inside the picture;
- odd column, odd row, and "write the line buffer";
- the column index.

`pixel_interp` needs nothing else.

## Timing and latency

The SRAM address, write enable and write data leave the FPGA registered. Read data is
expected on `sram_rdata` one clock after the address appears. The path is:

1. the slot issues the address;
2. the address is on the SRAM pins;
3. the data is back.

`pixel_interp` adds two register stages: the horizontal mean plus the line-buffer read, then
the vertical mean. All four monitors' pixels for one pixel period are ready by slot 3 of the
next period. They are then loaded together into the output register.

Blank and the syncs pass through the same two pixel-period delay. Output pixels, `vga_blank_n`,
`vga_hsync` and `vga_vsync` therefore change together at the start of a pixel period, two
periods after the counters.

`pix_clk` (slot counter bit 1) rises in the middle of each period, for the RAMDAC pixel
port.

Position, size and image are latched once per frame, at the first vertical blanking line.
All four screens therefore change in the same frame, and a move never tears a frame.

The VGA format is 640 × 480 at 60 Hz: 800 × 525 pixel periods with the usual porches, 96-pixel
HSYNC and 2-line VSYNC pulses. Both syncs are active low. `SYNC_ACTIVE_HIGH` on `vga_timing`
inverts them.

## Start-up

After reset three things run in parallel.

- **Image copy (`eeprom_controller`).** The EEPROM is too slow to be read at the pixel rate,
  so its contents are copied into the SRAM first. The copy counts from address 0 to the last
  word (614,400 words for two pictures). It holds each address for `ROM_WAIT` = 15 cycles
  (150 ns), samples the data, and writes it to the same SRAM address. One word takes 16
  cycles, so the whole copy takes about 98 ms. The EEPROM read strobe stays high until the
  last address. Until `load_done` rises, the SRAM controller passes these writes to the SRAM
  and the screens stay black.
- **RAMDAC programming (`ramdac_ctrl`).** The controller writes the pixel read mask (FF) of
  all four RAMDACs over their shared MPU bus. It then loads the 256 palette entries with
  red = green = blue = index, using the address register's auto-increment. Each colour then
  passes through the palette unchanged. This is 770 write cycles. Each cycle holds `rs`/`d`
  for 2 cycles, then `wr_n` low for 8 cycles (80 ns), then a 2-cycle hold.
- **Mouse initialisation (`mouse_driver`).** The driver sends the PS/2 command `0xF4`
  (enable data reporting) and waits for `0xFA`. If no acknowledge arrives within 25 ms, it
  sends the command again. `mouse_ready` then rises.

## Mouse control

`mouse_driver` contains:

- a two-flop synchroniser on each PS/2 line;
- a host-to-device transmitter (`ps2_tx`): the clock is held low for 100 µs, then a start
  bit, eight data bits, odd parity and a stop bit, then the acknowledge is checked;
- a device-to-host receiver (`ps2_rx`), which samples on falling clock edges, checks start,
  parity and stop, and drops a frame that stalls for 200 µs;
- the packet logic.

Standard three-byte packets are assembled. Byte 0 must have bit 3 set, otherwise it is
skipped; this keeps the driver aligned to packet boundaries. Byte 0 carries the buttons and
the sign bits, bytes 1 and 2 the X and Y movement. PS/2 Y points up and the canvas Y points
down, so Y is subtracted.

Each button goes through `button_debounce`. A reported level must hold for 20 ms before it
counts, and the accepted press is one click. Button reports that flicker while the button is
held therefore give one click, not several.

## Interfaces of `mva_top`

| Port | Dir | Width | Use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz system clock (4 × pixel rate), asynchronous active-low reset |
| `rom_addr`, `rom_rd`, `rom_data` | out/out/in | 20/1/24 | EEPROM |
| `sram_addr`, `sram_we`, `sram_wdata`, `sram_rdata` | out/out/out/in | 20/1/24/24 | SRAM; read data one clock after the address |
| `ps2_clk_i`, `ps2_data_i` | in | 1 | PS/2 line levels |
| `ps2_clk_oe`, `ps2_data_oe` | out | 1 | 1 = pull the line low (open collector) |
| `pix_clk` | out | 1 | pixel clock for the RAMDACs |
| `vga_rgb[4]` | out | 4 × 24 | per-monitor pixel, `mva_pkg::rgb_t` {r, g, b}, for the RAMDAC pixel ports |
| `vga_rgb3[4]` | out | 4 × 3 | per-monitor 3-bit colour {R7, G7, B7} for the resistor DACs |
| `vga_blank_n`, `vga_hsync`, `vga_vsync` | out | 1 | shared by all four connectors |
| `dac_rs`, `dac_d`, `dac_wr_n`, `dac_rd_n` | out | 3/8/1/1 | RAMDAC MPU bus, shared by the four RAMDACs |
| `load_done`, `dac_done`, `mouse_ready` | out | 1 | start-up status |

The RAMDAC overlay inputs and S0/S1 are not driven by this design. Tie them to select the
colour palette.

### Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `H_ACTIVE`, `H_FP`, `H_SYNC`, `H_BP` | 640, 16, 96, 48 | horizontal timing, pixel periods |
| `V_ACTIVE`, `V_FP`, `V_SYNC`, `V_BP` | 480, 10, 2, 33 | vertical timing, lines |
| `IMG_W`, `IMG_H` | 640, 480 | stored picture size |
| `NUM_IMG` | 2 | pictures stored (the right button cycles through them) |
| `ROM_WAIT` | 15 | EEPROM access, clock cycles |
| `INHIBIT`, `RX_TIMEOUT`, `ACK_TIMEOUT` | 10,000 / 20,000 / 2,500,000 | PS/2 times, clock cycles |
| `DEBOUNCE` | 2,000,000 | button filter, clock cycles |

The line buffers take 4 × 640 × 24 = 61,440 bits of block RAM.

## Where the design goes beyond the original specification

The original specification fixes the block structure and most of the behaviour:

- the ROM controller copying from address zero to the final address with the read strobe
  held, and the RAM controller generating addresses from the picture position;
- 640 × 480 VGA at 25 MHz, four outputs with identical syncs;
- the 2 × 2 split, doubling with averaging of neighbouring pixels, and two swappable
  pictures;
- left-click enlarge/restore and right-click image switch, with debounced buttons and page
  limits that change with the size;
- 3-bit and 24-bit outputs, and a RAMDAC programmed by the FPGA.

The following are this design's own choices:

- **Read rate.** The specification gives the memory read rate both as four times the pixel
  rate and as the pixel rate itself. This design reads four times per pixel period, since
  an enlarged picture needs a different source pixel on every monitor.
- **Interpolation.** The exact kernel is this design's choice: a factor-2 bilinear mean,
  rounded per stage, with the read schedule described above.
- **Formats.** VGA porches, sync polarity, the 15-cycle EEPROM wait, the SRAM read latency,
  the picture's storage order (picture after picture, row by row) and the black background.
- **Mouse.** The mouse is taken to be a PS/2 mouse. The init command `0xF4` and its retry,
  the 20 ms debounce time, one canvas pixel per mouse count and the centred start position
  are this design's own.
- **RAMDAC programming.** The identity palette and FF mask, and the register-select codes
  (000 address, 001 palette, 010 mask) of the Bt471/ADV47x family. The RAMDAC's mode/command
  register is not written, so the RAMDAC must come up in (or be strapped to) 8-bit DAC mode
  for full 24-bit colour.
- **Shared outputs.** One set of sync and blank outputs is shared by the four connectors,
  and one MPU bus serves the four RAMDACs. No output drives a RAMDAC's SYNC input. Tie it
  inactive on the board. The monitors receive separate HSYNC and VSYNC.

Not part of the RTL:

- the analog front end that would digitise a computer's SVGA output (the design shows
  stored pictures instead);
- the RAMDACs themselves;
- the 3-bit D/A with its level shifting, 75 Ω matching and protection;
- the EEPROM, SRAM and mouse.

The original 800 × 600 at 40 MHz target can be set through the timing parameters. It then
needs a 160 MHz system clock, and a 1600 × 1200 canvas for which `IMG_W`/`IMG_H` must be
raised.

## Files

`rtl/` holds one module or package per file:

- `mva_pkg` — pixel type, averaging function, VGA defaults;
- `mva_top`, `vga_timing`, `eeprom_controller`, `sram_controller`, `pixel_interp`;
- `mouse_driver` with `ps2_tx`, `ps2_rx` and `button_debounce`;
- `ramdac_ctrl`.

`tb/` holds one self-checking testbench per block, plus:

- `tb_mva_full`, the whole design at its default size;
- behavioural models of the EEPROM (slow access, junk data before it is valid), the SRAM
  and the PS/2 mouse;
- `mva_tb_pkg` — the test picture and an independent reference model. It gives the colour
  of any monitor pixel straight from the source picture, without the read schedule;
- `quad_monitor_checker` — it recovers pixel positions from the sync and blank outputs
  alone, and compares every visible pixel of all four monitors with the reference.

Each testbench prints `TB_RESULT checks=N failures=M`. The ones that test the whole design:

- **`tb_mva_top`** runs a 16 × 12 monitor format with 8 × 6 pictures. It moves the picture,
  runs it into the limits, enlarges, switches pictures and reduces. After each step it
  checks every pixel of two frames. It also checks the load time, the 770 RAMDAC writes and
  the 3-bit outputs.
- **`tb_mva_full`** runs at full size. It copies all 614,400 words, initialises the mouse
  at real PS/2 speed, and checks every pixel of all four monitors for a centred frame and
  for an enlarged frame. It takes about 15 million clock cycles, some 20 s of simulation.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mva_pkg.sv tb/mva_tb_pkg.sv tb/tb_mva_top.sv --top-module tb_mva_top
./obj_dir/Vtb_mva_top
```

Replace `tb_mva_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/mva_pkg.sv rtl/<module>.sv`.
