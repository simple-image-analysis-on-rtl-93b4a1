# 16-colour frame-buffer VGA controller for a bitmap viewer

This design is the hardware of a small image viewer built around a soft
processor on an FPGA. The processor receives a 16-colour bitmap over a serial
line and keeps it in external SDRAM. The board switches then select one of
three views:

- the picture itself;
- the difference of each pixel and its right-hand neighbour (edges along x);
- the difference of each pixel and the pixel below it (edges along y).

The processor copies the selected view, one byte per pixel, into the frame
store of a VGA controller. The controller shows the frame store on a
640 x 480 monitor without any further help from the processor.

All image processing is software. The hardware in this repository is the VGA
controller and the response side of the on-chip peripheral bus (OPB) that
connects it to the processor:

- the **VGA controller** holds a 320 x 240 picture of 4-bit colour indices
  (307,200 bits, all on chip);
- it **scans the picture at double size**, so every stored pixel becomes a
  2 x 2 block on the screen;
- it **maps each index through a fixed 16-entry palette** to 3 bits each of
  red, green and blue.

```
                 OPB request (processor)
   cpu_req ──────────┬───────────────────────────────► to GPIO / UART / DDR (outside)
                     │
             ┌───────▼────────── opb_vga_ctrl ─────────────────────────────┐
             │ opb_vga_slave ──we/waddr/wdata──► vram port B                │
             │                                   (76800 x 4)               │
             │ vga_timing ─tick,h_act,v_act,─► vga_addr_gen ─addr─► port A  │
             │            last_col,row_odd                          │       │
             │            hsync_n,vsync_n ─────────┐        douta ──▼       │
             │                                     │      color_lut         │
             │                                     ▼          ▼             │
             │                      output register (on tick)               │
             └───────┬──────────────────────────────────────┬───────────────┘
          vga_rsp    │                                      │ vga_hsync_n, vga_vsync_n, vga_rgb
   gpio_rsp ─┐       ▼
   uart_rsp ─┼──► opb_bus (OR) ──► cpu_rsp
   ddr_rsp  ─┘
```

## What is hardware here and what is not

`bmp_display_top` is the FPGA-side system. It contains the VGA controller
(`opb_vga_ctrl`) and the OR-combining of bus responses (`opb_bus`). The other
parts of the system are standard cores of the processor platform and are not
included:

- the soft processor, with its program memory;
- the serial UART (19200 bit/s);
- an 8-bit GPIO for the switches, whose two top bits select the view;
- the DDR controller, with its clock generator (66 MHz from 100 MHz);
- the 32 MB SDRAM chip.

They connect through ports of the top:

- the processor's bus request comes in on `cpu_req`, and the other
  peripherals watch the same signals;
- their responses come in on `gpio_rsp`, `uart_rsp` and `ddr_rsp`;
- the combined response goes back to the processor on `cpu_rsp`.

The testbenches supply behavioural models for the processor, the DDR memory
and the GPIO.

## The frame store and how pictures get into it

`vram` is a simple dual-port RAM of 76800 words of 4 bits, with a 17-bit
address. Both ports run on the 100 MHz bus clock:

- **port A** is read by the display. It is synchronous: the word appears one
  clock after its address.
- **port B** is written from the bus. Writes to addresses 76800 and above are
  dropped. Those addresses read as 0.

The bus side is `opb_vga_slave`. It takes a transfer when `select` is high and
the byte address is inside `[C_BASEADDR, C_HIGHADDR]`. The default window is
`0x8000_0000`–`0x8001_FFFF`. A write stores data bits `[3:0]` at address bits
`[16:0]`.

So the processor writes pixel *k* of the picture, in row-major order with
320 pixels per row, as a byte store to `base + k`. A whole view is therefore
one `memcpy` of 76800 bytes. Only the low four bits of each byte are kept, so
negative differences computed in software wrap round to one of the 16
colours.

**Bus handshake.** `xferack` is a single-clock pulse. It comes on the clock
after the first cycle of a write. Two rules are checked by assertions:

- an acknowledge always answers a write to this slave;
- an acknowledge is never longer than one clock.

The slave is write-only. Reads get no acknowledge and return zero data, so a
read of this address range ends only through the bus timeout. `errack`,
`retry` and `toutsup` stay low. Byte enables are ignored.

**Bus numbering.** OPB numbers its bits big-endian (bit 0 is the most
significant). In this RTL every bus vector is `[31:0]`, with bit 31 the most
significant, so OPB bit *i* is bit `31-i` here. Data bits `[3:0]` here are
OPB data bits 28–31.

## Raster timing

`vga_timing` divides the 100 MHz clock by `CLK_DIV = 4`. The result is a
one-clock `tick` every 4 clocks, a 25 MHz pixel rate. That is close enough to
the nominal 25.175 MHz of 640 x 480 at 60 Hz. `tick` is an enable; it is
never used as a clock.

On each tick the position `(x, y)` moves through an 800 x 525 raster. Each
line and each frame has the same sequence of segments:

| segment        | horizontal (pixels) | x range  | vertical (lines) | y range  |
|----------------|---------------------|----------|------------------|----------|
| front porch    | 8                   | 0–7      | 2                | 0–1      |
| sync (low)     | 96                  | 8–103    | 2                | 2–3      |
| back porch     | 40                  | 104–143  | 25               | 4–28     |
| border (black) | 8                   | 144–151  | 8                | 29–36    |
| picture        | 640                 | 152–791  | 480              | 37–516   |
| border (black) | 8                   | 792–799  | 8                | 517–524  |

Both sync pulses are active low. Every segment length is a parameter
(`H_FRONT`, `H_SYNC`, `H_BACK`, `H_LBORDER`, `H_PIXEL`, `H_RBORDER` and the
same `V_` set). The stored picture is always `H_PIXEL/2` x `V_PIXEL/2`.

## The 2 x 2 scan: how the read address is made

This is the least obvious part of the design. The screen has 640 x 480 pixels
and the memory holds 320 x 240, so each stored pixel must be used for four
screen pixels:

- the one read from memory;
- its right-hand neighbour;
- the two pixels below those.

`vga_addr_gen` does not compute `(y/2)*320 + x/2`. It keeps a running address
and moves it only by increments and one wind-back per line.

- **Along a visible line**, a `hold` flag toggles on every pixel. The address
  advances after the second pixel of each pair, so it changes every other
  pixel. After 640 pixels it has moved on by exactly one stored line (320).
- **At the end of the first screen line of a pair**, the address is wound back
  to `line_addr`, the start of the stored line just shown. The next screen
  line therefore shows the same stored line again.
- **At the end of the second screen line of a pair**, the address keeps its
  increment, and `line_addr` moves to the new stored line.
- **Outside the visible lines**, the address, `line_addr` and `hold` are held
  at zero, ready for the next frame.

Pairs of lines are counted from the first visible line (`row_odd` from
`vga_timing`). Pairs of pixels are counted from the first visible pixel. The
result is exact: screen pixel `(sx, sy)` of the picture always reads stored
pixel `(sy/2)*320 + sx/2`, from the first line of every frame.

**When each update happens.** All updates occur on `tick` and look at the
position that is ending, which is what the timing signals show before the
tick edge. So right after the edge, `addr` is the address of the new
position. The memory returns its word one clock later, and the pixel lasts
four clocks.

## Colour and output timing

`color_lut` turns the index into `{r, g, b}`, 3 bits each. The palette is in
`vga_pkg::COLOR_LUT`:

| index | r g b | index | r g b |
|-------|-------|-------|-------|
| 0 black      | 0 0 0 | 8 grey  | 3 3 3 |
| 1 dark red   | 1 0 0 | 9 red   | 3 0 0 |
| 2 dark green | 0 1 0 | 10 green| 0 3 0 |
| 3 dark blue  | 0 0 1 | 11 blue | 0 0 3 |
| 4            | 1 1 0 | 12      | 3 3 0 |
| 5            | 1 0 1 | 13      | 3 0 3 |
| 6            | 0 1 1 | 14      | 0 3 3 |
| 7            | 1 1 1 | 15 white| 7 7 7 |

Outside the 640 x 480 window the colour is forced to black.

The sync levels and the colour of a pixel are registered together, on the
tick that ends that pixel. The VGA pins therefore lag the raster counters by
exactly one pixel period (4 clocks). Colour and sync stay aligned with each
other, and neither glitches within a pixel. This scheme needs `CLK_DIV >= 2`;
an elaboration-time assertion checks it.

A write from the bus shows up the next time the scan passes its address.
Within one frame, the picture can be partly old and partly new.

## Departures from the original controller

This RTL follows the original in these points:

- the 320 x 240 x 4-bit frame store;
- the 16-colour palette;
- the bus-clock-divided-by-4 pixel rate;
- the raster timing in the table above;
- the write-only bus slave;
- the running-address scan with a hold flag and a one-line wind-back.

It departs from the original in these points:

- **The scan is exact.** The original winds the address back at the start of
  every odd raster line. Its picture starts on line 37, which is odd, so the
  first visible line read from below address 0. Its horizontal pixel pairs
  were also offset by one pixel. Here, pairs are counted from the first
  visible line and pixel.
- **There is one 2 x 2 block per stored pixel.** One description of the
  original says each pixel is read "three times". The intended result is one
  read plus three copies, which is what is built.
- **The acknowledge is one clock long.** The original registered the
  acknowledge straight from the write strobe. While the master still held
  `select`, that produced a second acknowledge.
- **Colour and sync are aligned by one output register.** The original drove
  the colour combinationally from the memory output and registered the sync
  signals.
- **The vertical counter is 10 bits.** A 9-bit counter cannot reach line 524.
- **There is one synchronous, active-high reset.** It resets the counters,
  the address generator, the acknowledge and the outputs.
- **The address window `0x8000_0000`–`0x8001_FFFF` is an example.** The
  original takes its window from the platform's address map.

The OR-combining bus (`opb_bus`) is the standard realisation of an OPB
response path with one master. No arbiter or bus timeout is included.

## Files

| file | content |
|------|---------|
| `rtl/vga_pkg.sv` | bus request/response structs, `rgb_t`, palette |
| `rtl/vga_timing.sv` | clock divider, raster counters, sync and window decode |
| `rtl/vga_addr_gen.sv` | 2 x 2 scan address generator |
| `rtl/vram.sv` | 76800 x 4 dual-port frame store |
| `rtl/color_lut.sv` | index to RGB, blanking |
| `rtl/opb_vga_slave.sv` | bus address decode, write strobe, acknowledge |
| `rtl/opb_vga_ctrl.sv` | the VGA controller |
| `rtl/opb_bus.sv` | OR of slave responses |
| `rtl/bmp_display_top.sv` | system top |

Testbench support files in `tb/`:

- `opb_cpu_model.sv` is a bus-master model.
- `opb_mem_model.sv` is a bus-slave memory that stands in for the SDRAM with
  its controller, or for the switches.
- `vga_monitor.sv` is an independent VGA receiver. It locks to the sync
  pulses, checks their widths and periods and the blanking, and captures
  frames.
- `bmp_sw_env.sv` replays the viewer program as bus transfers. It unpacks a
  bottom-up 4-bit bitmap into SDRAM, flips it upright, reads the switches and
  writes the chosen view. It keeps a shadow copy of everything written to the
  frame store.
- `tb_vga_pkg.sv` holds a separately written copy of the palette.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vga_pkg.sv tb/tb_vga_pkg.sv tb/tb_bmp_display_full.sv \
    --top-module tb_bmp_display_full
./obj_dir/Vtb_bmp_display_full
```

| testbench | what it shows |
|-----------|---------------|
| `tb_vga_timing` | default timing over a full frame: tick every 4 clocks, every segment boundary, one sync pulse per line and frame, 307200 visible pixels |
| `tb_vga_addr_gen` | two default frames: every visible screen pixel reads `(sy/2)*320 + sx/2`; 240 wind-backs per frame |
| `tb_vram` | full-size memory: random traffic against a reference, read-first behaviour, out-of-range addresses |
| `tb_color_lut` | all 16 colours, and blanking |
| `tb_opb_vga_slave` | address window edges, data and address bits, one-clock acknowledge, no acknowledge for reads or outside the window |
| `tb_opb_bus` | OR of random responses |
| `tb_opb_vga_ctrl` | a 16 x 8 screen: pictures written over the bus, captured from the pins and compared as 2 x 2 blocks; rewrite while displaying; a write outside the window goes unanswered |
| `tb_bmp_display_top` | the whole viewer on a 32 x 24 screen, all three views twice. It counts bus writes, SDRAM and switch transfers through the shared bus, each view, pixel doubling, line repetition and sync pulses, and fails if any never happened. |
| `tb_bmp_display_full` | the whole viewer at default parameters (about 6 s in Verilator): a 320 x 240 picture and both edge views, each compared over a full 640 x 480 frame |

In `tb_bmp_display_top`, the SDRAM addresses alias frame-store addresses in
their low 17 bits. The test therefore also shows that the controller's
address decode ignores them.

Shrinking the screen for a faster test only needs smaller `H_`/`V_`
parameters on `bmp_display_top` or `opb_vga_ctrl`. The frame store and
address widths follow from `H_PIXEL/2 x V_PIXEL/2`.

## Resource notes

At the default size, synthesis gives:

- 307,200 bits of frame store, plus the 144-bit palette ROM;
- about 70 flip-flops;
- about 120 word-level cells.

The frame store is written as a plain array, so FPGA tools map it to block
RAM.
