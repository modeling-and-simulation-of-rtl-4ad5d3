# Virtual CMOS image sensor

Image processing hardware is hard to test with a real camera sensor. The
picture is never the same twice, there is sensor noise, and a given test
image cannot be reproduced. This design stands in for such a sensor. It
stores an image in memory and sends it out with the same signals as an
OV7620-type CMOS sensor: a pixel clock, a line signal, a frame signal and an
8-bit data bus. It can send the exact same frame as often as you like, or step
through a fixed sequence of frames. It can also send only part of the image,
like the windowing function of a real sensor. It runs in simulation in front
of the processing logic, or in an FPGA plugged in where the sensor module
would be.

The design has two blocks:

```
            +--------------+  mem_addr  +---------------------+  pclk
            | frame_memory | <--------- |  sensor_management  | ----->  href
            |  (image ROM) | ---------> |  (timing, windowing,| ----->  vsync
            +--------------+  mem_data  |   frame sequencing) | ----->  data[7:0]
                                        +---------------------+
                                          ^  win  ^ repeat_frame
```

`virtual_sensor` is the top. It connects the two blocks.

## Output timing

All timing comes from one master clock, `clk`.

| quantity | value | in `clk` periods |
|---|---|---|
| pixel clock `pclk` | `clk` / 2 | 2 |
| line period | `H_TOTAL` = 858 pixel periods | 1,716 |
| frame period | `V_TOTAL` = 525 lines | 900,900 |
| active image | `IMG_W` x `IMG_H` = 640 x 480 | |

These numbers follow the OV7620: 858 x 525 pixel periods, a 640 x 480 array,
and a pixel clock of half the crystal clock.

The bus follows these rules:

* A receiver samples `href`, `vsync` and `data` on the **rising** edge of
  `pclk`. All three change only on the clock edge on which `pclk` falls. They
  are therefore stable for one full `clk` period before and after the
  sampling edge. An assertion in `sensor_management` checks this.
* `href` is high only while the pixels of a line are on the bus. In each
  active line it is high for exactly `w` pixel periods, where `w` is the
  window width. It starts at pixel period `H_START` = 128 of the line.
* The active lines are lines `V_START` = 20 up to `V_START + h - 1` of the
  frame period, where `h` is the window height.
* `vsync` is high for the first `VS_LINES` = 4 lines of every frame period.
  That is, it comes right after the last line of the previous frame.
  `href` is never high together with `vsync`.
* When `href` is low, `data` keeps the last pixel that was sent.

`H_START`, `V_START` and `VS_LINES` are choices of this design, because the
sensor's blanking intervals are not specified here. All three are parameters.
The design checks at elaboration that the image fits in the line and frame
periods after the `vsync` pulse.

After reset (`rst_n` low, asynchronous), all outputs are 0. The second `clk`
edge after reset is released is the first falling edge of `pclk`. It starts
line 0 of frame 0. The first rising edge of `vsync` therefore comes one
`clk` after the first rising edge of `pclk`.

## How the management block works

A phase flip-flop divides `clk` by two and drives `pclk` directly. Each
`clk` edge on which `pclk` falls is a pixel tick. On a tick:

* the column counter (0 to `H_TOTAL`-1) and the line counter (0 to
  `V_TOTAL`-1) step to the next position;
* `href`, `vsync` and `data` are loaded for that position.

The memory address of the next position is computed combinationally from the
counters. It stays constant for the whole two-`clk` pixel period. A memory
with one `clk` of read latency therefore has the word ready before the next
tick. The address is

    addr = (f * IMG_H + y0 + row) * IMG_W + x0 + col

where `row` and `col` count the position inside the window. The
multiplications are by constants. A designer who needs the fastest clock can
replace them with incrementing address registers without changing the
interface.

## Windowing and frame sequences

`win` is a packed struct, `vsensor_pkg::window_t`, with four 16-bit fields:
`{x0, y0, w, h}`. It selects the part of the stored image that is sent.

* The window is sampled once per frame, on the tick that starts the frame
  period. You can therefore change it at any time, and the change takes
  effect from the next frame.
* The window's pixels are sent left-aligned at `H_START` and top-aligned at
  `V_START`. A smaller window therefore gives shorter `href` pulses and fewer
  active lines. The line and frame periods do not change.
* A window that is empty or does not fit inside the image is replaced by the
  full image. This keeps the output a valid frame.

The memory can hold `NUM_FRAMES` images, one after the other. The
`repeat_frame` input is also sampled at each frame start:

* `repeat_frame` = 1: the same stored frame is sent again.
* `repeat_frame` = 0: the next stored frame is sent. After the last frame it
  wraps around to frame 0.

The first frame after reset is always stored frame 0.

## Frame memory and images

`frame_memory` is a read-only array with one `DATA_W`-bit word per pixel. The
pixels are stored in raster order, frame after frame. The read is registered,
with one `clk` of latency, so it maps onto FPGA block RAM. The contents are
fixed when the design is built:

* `INIT_FILE` set: the file is read with `$readmemh`. It holds one hex word
  per pixel. The path is relative to the simulator's working directory. Test
  images, including defect pixels stuck at 0x00 or 0xFF, can be prepared
  this way. `tb/frame_6x5.hex` is a 6 x 5 example.
* `INIT_FILE` empty: a built-in pattern is used.
  * `PATTERN` = 0 (default): a checkerboard. A pixel is 0xFF where
    x + y + frame is even and 0x07 where it is odd.
  * `PATTERN` = 1: a ramp. A pixel is (x + 3y + 7·frame) mod 2^`DATA_W`.

At the default size the memory holds 640 x 480 x 8 bits. That is 2,457,600
bits, in 307,200 words with a 19-bit address. The frame size is limited only
by the memory the target FPGA can offer. For a smaller device, set `IMG_W` and
`IMG_H` lower, or send a window of a smaller image.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 8 | bits per pixel |
| `IMG_W`, `IMG_H` | 640, 480 | stored image size |
| `NUM_FRAMES` | 1 | number of stored images |
| `H_TOTAL` | 858 | pixel periods per line |
| `V_TOTAL` | 525 | lines per frame |
| `H_START` | 128 | first `href` pixel period in a line (own choice) |
| `V_START` | 20 | first active line in a frame (own choice) |
| `VS_LINES` | 4 | `vsync` length in lines (own choice) |
| `PATTERN` | 0 | built-in image when no file is given |
| `INIT_FILE` | "" | hex file with the image(s) |

Shared constants and the window type are in `rtl/vsensor_pkg.sv`.

## What is modelled and what is not

The design reproduces the parts of a sensor's output that a downstream
processor relies on. These are the pixel clock, `href`, `vsync` and one
monochrome 8-bit data bus, with the OV7620 line and frame lengths.

It does not model the sensor's analog side: the pixel array, the A/D
converters, exposure, gain and white balance control, or the I2C register
interface. It also does not produce the OV7620's other outputs (FODD,
VHSYNC, CHSYNC, the UV bus, VTO). Noise and defect pixels are not generated
by logic. They are part of the image you load.

These are choices of this design where the sensor's behaviour was not
pinned down:

* the blanking placement and `vsync` length;
* outputs that change on the falling edge of `pclk`;
* `data` holding its last value while `href` is low;
* the window interface and its fall-back to the full image;
* the `repeat_frame` sequencing;
* the hex file format;
* the default checkerboard pattern;
* the reset behaviour.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

* `tb/sensor_checker.sv` is a reference monitor shared by the testbenches
  below. At every rising edge of `pclk` it works out the expected `href`,
  `vsync` and `data` from its own pixel count and the image formula. It also
  checks:
  * the 2-`clk` pixel clock;
  * the line period (2·`H_TOTAL` clk between `href` rises);
  * the frame period (2·`H_TOTAL`·`V_TOTAL` clk between `vsync` rises);
  * the pixels per line.

  It counts how often windowing, window fall-back, frame repeat and frame
  sequencing happened.
* `tb_frame_memory`: both built-in patterns and the hex file, all addresses
  plus random ones, and the one-`clk` read latency.
* `tb_sensor_management`: the management block with a modelled memory whose
  words are all different. It uses a 6 x 5 image, two stored frames, 12 x 10
  timing, several windows (including an invalid one), and repeat and
  sequence modes. Each mechanism must occur at least once.
* `tb_virtual_sensor`: the whole sensor at a reduced size (6 x 5 image,
  16 x 10 timing). A receiver rebuilds every frame from the bus and compares
  it with the stored window.
* `tb_virtual_sensor_full`: the top with every parameter at its default. It
  sends three 640 x 480 frames (full, a 320 x 240 window, an invalid window).
  Every one of the 2.7 million pixel periods is checked. It runs in about
  1.5 s.
* `tb_example_frame`: the 6 x 5 example image from `tb/frame_6x5.hex` with
  the full 858 x 525 timing. It checks five `href` pulses of six pixels per
  frame and the exact pixel values over two repeated frames.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/` (the hex file paths are relative to it):

```
verilator --binary --timing --assert --top-module tb_virtual_sensor_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/vsensor_pkg.sv tb/tb_virtual_sensor_full.sv
./obj_dir/Vtb_virtual_sensor_full
```

Replace the module name to run another testbench. To lint the RTL:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/vsensor_pkg.sv rtl/virtual_sensor.sv
```

Verilator reports that `rst_n` is used both as an asynchronous reset and,
inside the assertions' `disable iff`, synchronously. This is expected. It
also reports package constants that a given module does not use. Neither
warning affects the logic.
