# Automated receptionist: FPGA hardware

A front door that looks after visitors. An infrared proximity sensor notices
someone approaching. The system plays a recorded greeting through the
speakers, photographs the visitor with a small camera and hands the photo to
a web page. There, a person inside decides whether to let them in, and a
solenoid latch on the door is pulled open.

The original system runs on an Altera DE2 board (Cyclone II). Software on a
soft processor, with a real-time kernel, does the deciding and the web
serving. This RTL is the hardware around that processor:

- the peripheral bus and its address map;
- the camera capture path from the TV decoder chip into SRAM;
- the audio path to the codec;
- the I2C set-up of both chips;
- the sensor, latch, LED and SD-card lines;
- a VGA display of the last photo.

The processor itself, its memories and the Ethernet chip are not included
(see *What is not here*). The top module `project_top` exposes the
processor's data-master port (`cpu_req`/`cpu_rsp`) and its interrupt line.
Anything that speaks the bus below can drive the design; the testbench does.

## Block diagram

```
             cpu_req/cpu_rsp (external processor)           cpu_irq
                         |                                     ^
                  +--------------+                             |
                  | avalon_decoder|--- latch  output_pio ---> GPIO_0[1] -> Darlington -> solenoid
                  |  address map  |--- sensor ir_sensor_interface <- GPIO_0[0] <- IR sensor
                  |  decode_error |--- led / red_led output_pio -> LEDG / LEDR
                  +--------------+--- SD_DAT, SD_CMD, SD_DAT3 bidir_pio, SD_CLK output_pio -> SD card
                     |    |    |
                     |    |    +--- audio_dac_fifo --(FIFO 16x256, clk_audio)--> WM8731 DAC
                     |    +-------- video_in control slave
                     |                  |  TD_DATA (27 MHz) -> decoder -> buffer -> deinterlace
                     |                  |  -> 4:2:2->4:4:4 -> resize -> RGB -> frame writer
                     |                  |                                         |      \
                     +-- SRAM window ---+--> sram_arbiter <------------------------+   vga_adapter -> VGA
                                              |
                                       sram_controller -> 256K x 16 SRAM

  reset_delay (KEY[0], CLOCK_50) -> per-domain reset synchronisers
  i2c_av_config + i2c_controller (CLOCK_50) -> I2C to WM8731 (0x34) and ADV7181 (0x40)
```

### Clocks and resets

| Clock       | Frequency  | Drives |
|-------------|------------|--------|
| `clk_sys`   | 100 MHz    | Bus, every slave, the video chain after its buffer, SRAM. |
| `CLOCK_50`  | 50 MHz     | Reset delay and the I2C set-up. |
| `CLOCK_27`  | 27 MHz     | TV-decoder bytes: the ITU-R 656 decoder and the write side of the video buffer. |
| `clk_audio` | 18.432 MHz | Codec chip clock (`AUD_XCK`) and the audio serialiser. |
| `clk_vga`   | 25 MHz     | VGA scan-out. |

The source system runs the processor at 100 MHz. At 50 MHz its audio could not
keep up with 48 kHz. The PLLs that make `clk_sys`, `clk_audio` and `clk_vga`
are vendor blocks, so the clocks arrive as ports.

Resets work as follows:

- Pressing `KEY[0]` asserts the reset at once.
- After the key is released, `reset_delay` holds the reset for 2^20 cycles of
  `CLOCK_50` (about 21 ms).
- The delayed reset is then released in each clock domain through a two-flop
  synchroniser.
- `TD_RESET` to the TV decoder rises together with the delayed reset.

Only data that crosses clock domains through a FIFO or a synchroniser is
allowed:

- the two dual-clock FIFOs;
- the one-bit status flags, through two-flop synchronisers.

Two signals are deliberately left unsynchronised: the `underflow_count` and
`overflow_count` monitor counters. They are meant to be read from a
testbench.

## The processor bus

Every slave uses one small Avalon-MM-like protocol, defined as packed
structs in `ar_pkg`.

`avm_req_t` carries these fields:

- `address`: byte address, 25 bits;
- `read` and `write`;
- `writedata`: 32 bits;
- `byteenable`.

`avm_rsp_t` carries `readdata`, `waitrequest` and `readdatavalid`.

The protocol works like this:

- An access is taken in the cycle where `read` or `write` is high and
  `waitrequest` is low. The master holds the request until then.
- Read data comes back later, flagged by `readdatavalid`. Register slaves
  answer one cycle after the read.
- The slaves that can stall are the audio FIFO (when full) and the SRAM
  (three cycles per access, plus arbitration).

`avalon_decoder` compares the address with the map and passes the access to
one slave. The address it passes is relative to that slave's base. This
matters because some ranges of the original map, such as the LED PIO at
0x1109070, are not aligned to their own size.

The decoder has two further rules:

- It keeps one read in flight: while a read is outstanding, new accesses
  wait.
- An address that no slave claims completes at once. Reads there return 0,
  and the sticky `decode_error` flag is set.

| Range (byte address)   | Slave | Registers (word offsets) |
|------------------------|-------|--------------------------|
| 0x1109040 – 0x110905f  | latch PIO, 1 bit | 0 data, 4 set bits, 5 clear bits |
| 0x1109070 – 0x110907f  | green LED PIO, 9 bits | same |
| 0x1109080 – 0x110908f  | IR sensor PIO, irq | 0 level, 2 irq mask, 3 edge capture (write 1 to clear) |
| 0x11090a0 – 0x11090bf  | red LED PIO, 18 bits | as latch |
| 0x11090c0 / d0 / 0x1109120 | SD_DAT / SD_CMD / SD_DAT3 | 0 data (reads the pin), 1 direction (1 = drive) |
| 0x11090e0              | SD_CLK | as latch |
| 0x1109100 – 0x110910f  | audio | 0 write a sample; 1 status `{underflow seen, full, level[9:0]}` |
| 0x1109110 – 0x110911f  | video in | 0 write bit 0 = capture, read `{overflow, done, busy}`; 1 frame base (SRAM word); 2 frames captured |
| 0x1000000 – 0x10fffff  | SRAM | one 16-bit SRAM word per 32-bit bus word (`address[19:2]`) |

The latch, sensor and green-LED ranges are those of the original system. The
other addresses were chosen in free space of the same map. SDRAM
(0x0800000–0x0ffffff) and the LCD (0x1109060) are left unmapped here.

## The photo path (`video_in`)

This is the largest part of the design and the one with the most timing
subtleties. Its stages are below, with throughput figures at full size.

### ITU-R 656 decoder (`itu656_decoder`, 27 MHz)

The TV decoder sends bytes `Cb Y Cr Y ...` with embedded timing reference
codes `FF 00 00 XY`. In the XY byte:

- F (bit 6) is the field;
- V (bit 5) is vertical blanking;
- H (bit 4) distinguishes EAV (end of active video) from SAV (start of
  active video).

The decoder works as follows:

- It counts active lines at each SAV with V = 0.
- It keeps lines 0..239 of each field.
- From each line's 720 pixels it keeps the centred 640 (pixels 40..679).
- It outputs one 4:2:2 pixel every second clock, marked with the field bit,
  start of frame (first pixel of line 0) and end of line.

The decoder has no back-pressure. A pixel that finds the video buffer full is
lost and counted in `overflow_count`. A sticky overflow flag also appears in
the status register.

### Video buffer (`dual_clock_fifo`, 512 words)

The buffer carries `{field, sof, eol, pixel}` from 27 MHz to 100 MHz. The
FIFO uses Gray-coded pointers with two-flop synchronisers. Its read side is
show-ahead.

### Deinterlacer (`video_deinterlacer`)

The deinterlacer keeps field 0 and drops field 1. Each kept line goes out
twice:

- once while it is written into a 640-pixel line buffer;
- once more replayed from that buffer.

The result is a progressive 640x480 frame. While it replays, it does not
accept input. That is the reason the buffer exists: it absorbs the 640-pixel
replay, which at 100 MHz takes about 1/8 of a line time.

### 4:2:2 to 4:4:4 (`ycrcb422_to_444`)

Each pair of pixels shares the Cb of the even pixel and the Cr of the odd
one. The pairing restarts at every start of frame and end of line.

### Resize (`video_resize`)

The resize stage keeps pixels with even x on lines with even y: 640x480
becomes 320x240. Because line doubling and even-line selection cancel, the
stored photo is field 0 at full vertical resolution of one field. Each stored
pixel (x, y) is source pixel 40 + 2x of line y of field 0.

### RGB conversion (`ycrcb_to_rgb`)

This stage converts BT.601 video-range YCbCr to RGB in 8.8 fixed point, with
rounding and clamping to 0..255:

- R = (298(Y−16) + 409(Cr−128) + 128) >> 8
- G = (298(Y−16) − 100(Cb−128) − 208(Cr−128) + 128) >> 8
- B = (298(Y−16) + 516(Cb−128) + 128) >> 8

### Frame writer

The chain runs all the time. While no capture is requested, the writer simply
throws frames away.

When software writes bit 0 of the control register, the capture proceeds:

- The writer arms and waits for the next start of frame.
- It writes the 76,800 pixels of that frame as RGB565 to SRAM word
  `base + y*320 + x`. The address comes from `vga_address_translator`.
- It then sets `done` and counts the frame.

If the SRAM is busy, the writer stalls the chain through the valid/ready
handshakes. Input keeps arriving at 27 MHz, so a long stall ends in buffer
overflow rather than in a lock-up. After an overflow, the next start of frame
puts the geometry right again; this is tested.

### Throughput budget at full size

- Input: 13.5 Mpixel/s.
- After line doubling: at most 27 Mpixel/s in bursts, into a 100 MHz chain
  that takes one pixel per clock.
- SRAM: at most one write per four doubled pixels. That is about 7 M writes/s
  against the 33 M accesses/s of the SRAM controller, shared round robin with
  the processor.

The full-size test captures a frame while the processor hammers the SRAM, and
no pixel is lost. Slowing `clk_sys` to 5 MHz does overflow the buffer, as it
should.

## Audio playback (`audio_dac_fifo`)

The greeting is a 48 kHz, 2-channel, 16-bit WAV file read from the SD card by
software. Software writes samples, left then right, to word 0 of the audio
slave. They queue in a 16 x 256 dual-clock FIFO, which holds 2.7 ms of
audio.

The serialiser works as follows:

- It runs on the 18.432 MHz codec clock.
- LRCK is 384 clocks long (48 kHz), high for left.
- BCLK runs at 32 fs: 6 clocks high, 6 low.
- Data are left-justified, MSB first, changing on the falling edge of BCLK.
- One word is taken from the FIFO at every LRCK edge.

While the FIFO is full, a bus write is stalled with `waitrequest`. This is
what paces the software to the playback rate.

When the FIFO runs dry:

- zeros are sent;
- `underflow_count` increments;
- the `underflow seen` flag sets.

Playback resumes only at a left-channel edge. A late sample therefore never
swaps the two channels.

## I2C set-up (`i2c_av_config`, `i2c_controller`)

After reset, `i2c_av_config` writes 22 registers: 10 to the WM8731 codec
(device 0x34) and 12 to the ADV7181 TV decoder (device 0x40). Each write is
one 24-bit transfer of the form `{device, register, value}`, sent by
`i2c_controller`.

The controller's transfer has this shape:

- START;
- three bytes, each followed by an acknowledge slot;
- STOP.

Timing details:

- The clock is 20 kHz, generated from quarter-period ticks of the 50 MHz
  clock.
- SCL is driven push-pull; SDA is open drain (`I2C_SDAT_oe` pulls it low).

A write that is not acknowledged is sent again, and the retry counter counts
it. `cfg_done` rises when the table is finished.

The register values were chosen from the chips' data sheets; the original
system used a demonstration file whose values are not published with it:

- Codec: 48 kHz normal mode from 18.432 MHz, left-justified 16-bit slave
  format matching the serialiser, DAC selected, all blocks powered, line-out
  volume.
- Decoder: composite input with standard auto-detect, ITU-R 656 output with
  embedded codes.

The decoder values are the part of this RTL most worth checking on hardware
before trusting it.

## Sensor, latch, LEDs and SD lines

**`ir_sensor_interface`**

- Synchronises the sensor line.
- Captures rising edges in an edge register.
- Raises `cpu_irq` while any unmasked captured edge is set. Software clears
  it by writing 1 to the edge register.

The sensor's analog output becomes a logic level outside the FPGA.

**`output_pio`**

- A data register with set and clear words, so that two tasks never undo each
  other's bits.
- Bit 0 of the latch instance drives `GPIO_0[1]`. On the board, that pin
  drives the base of a TIP120 Darlington that switches the 12 V solenoid.
- 1 pulls the latch.

**`bidir_pio`**

- Gives software bit-level control of the SD card lines: a data register and
  a direction register.
- Software implements SPI on them.

## SRAM (`sram_controller`, `sram_arbiter`)

Each access to the asynchronous 256K x 16 SRAM takes three `clk_sys`
cycles:

1. Address, chip enable and OE or WE are set up.
2. WE rises at the end of this cycle, and read data are sampled here.
3. The bus turns around.

Read data return two cycles after the access is taken. Writes use the byte
lanes (`UB_N`/`LB_N`). The data bus is split into `SRAM_DQ_o`, `SRAM_DQ_oe`
and `SRAM_DQ_i`. Assertions check two rules: WE and OE are never low
together, and no read and write happen in the same cycle.

`sram_arbiter` shares the controller between the processor (master 0) and the
frame writer (master 1):

- It alternates between them when both ask.
- It routes read data to the master that issued the read.

## VGA display (`vga_adapter`, `vga_controller`)

The VGA adapter keeps a 320x240 frame buffer at one bit per colour channel
(230 kbit), so that it fits in on-chip memory. It is written through a
`plot/x/y/colour` port; in the top, that port carries the frame writer's
pixels (top bit of each RGB565 channel).

`vga_controller` scans the buffer out at 640x480, 60 Hz, from 25 MHz:

- 800 clocks per line, 525 lines per frame;
- sync pulses 96 clocks and 2 lines wide, active low;
- each stored pixel shown as 2x2 screen pixels.

The memory read takes one clock, so syncs and blank are delayed to match.

## Where this design fills in or departs from the original

- **Documentation only.** Many blocks are described in the original only by
  name or function: decoder, deinterlacer, resize, colour conversion, FIFOs,
  audio core, I2C, SRAM, reset delay, VGA. Their insides here are the
  simplest design that does the job. Examples: line doubling rather than
  motion-adaptive deinterlacing, and decimation rather than filtered
  resizing.
- **Values chosen here.** These were all chosen for this design:
  - the register layouts;
  - every address outside the three printed ranges;
  - the RGB565 pixel format;
  - the I2C register table and the 20 kHz I2C clock;
  - the audio serial format;
  - the 2^20-cycle reset delay;
  - the VGA's one bit per channel.
- **GPIO bank 0** is 36 pins wide here, the data pins of the board's header.
  The sensor is on pin 0 and the latch on pin 1.
- **Clock names.** The original describes the codec clocks as "18.4 MHz"; the
  design uses 18.432 MHz, which is exactly 384 x 48 kHz. LRCK runs at
  48 kHz.
- **Interrupts.** The processor gets one interrupt line, the sensor's. The
  processor's other interrupt sources (timers, UART, Ethernet) belong to
  blocks that are not here.

## What is not here

These parts are used by the original system but not built here:

- the Nios II processor and its software (the tasks for control, web server,
  audio and latch);
- the SDRAM controller;
- flash and tristate bridges;
- on-chip RAM, sysid, timers, JTAG UART and the LCD;
- the DM9000A Ethernet chip and core;
- the PLLs.

They are vendor blocks or software. The board's chips (codec, TV decoder, SD
card, SRAM) and the analog parts (sensor, Darlington, solenoid, camera) are
outside the FPGA. For a complete FPGA build, the processor system must be
attached to `cpu_req`/`cpu_rsp`/`cpu_irq`, and a board wrapper must add the
pad tristates and PLLs.

## Files

- `rtl/`: one module or package per file.
  - `ar_pkg.sv` holds the bus structs, pixel types and the address map.
  - `project_top.sv` is the top.
- `tb/`: one self-checking testbench `tb_<module>.sv` per module, plus
  behavioural models shared by several testbenches:
  - `sram_model.sv`: asynchronous SRAM;
  - `i2c_slave_model.sv`: an I2C target that can refuse one transfer;
  - `itu656_source.sv`: an ITU-R 656 field generator with a test pattern;
  - `tb_video_pkg.sv`: the pattern and an independent reference model of the
    capture path.

## Simulating

Testbenches run with plain Verilator 5. For example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/ar_pkg.sv tb/tb_project_top.sv --top-module tb_project_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `project_top` with any module name for its own test. Each testbench
ends with a line `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if something hangs. All registers that are read are reset, so the
tests run with random initial values.

`tb_project_top` runs the whole design at its real sizes: the top has no
parameters. It takes about 15 s. The simulated scenario:

1. The reset delay runs; the I2C set-up continues in the background, with
   one refused transfer and its retry.
2. An access to an unmapped address sets the decode error.
3. LEDs, latch and SD lines are exercised.
4. A beam break raises the interrupt, which is then cleared.
5. 600 greeting samples fill the audio FIFO until it stalls the bus. The
   codec-side words are compared with the samples, and then the FIFO runs
   dry.
6. A full 320x240 capture runs while the processor uses the SRAM. The photo
   is read back over the bus and compared pixel by pixel with the reference,
   and the VGA buffer is checked too.
7. The system clock is slowed until the video buffer overflows.

Each of those mechanisms is counted, and one that never happens is a
failure.

The unit testbenches use reduced sizes where a full size would only cost
time. For example, `tb_video_in` captures a 16x8 photo from 40-pixel lines;
the I2C tests use a faster clock. Each testbench is also known to fail on a copy
of its module with one deliberate bug.

## Changing it

Sizes are parameters with the original numbers as defaults:

- `video_in`: `SRC_PIXELS`, `IN_W`, `IN_H`, `BUF_DEPTH`;
- `audio_dac_fifo`: `XCK_HZ`, `SAMPLE_RATE`, `SAMPLE_BITS`, `FIFO_DEPTH`;
- `i2c_av_config` and `i2c_controller`: `CLK_HZ`, `I2C_HZ`;
- `reset_delay`: `DELAY_CYCLES`;
- `vga_adapter`: `WIDTH`, `HEIGHT`, `BITS`.

Other changes go elsewhere:

- To move a slave, edit its range in `ar_pkg`. The decoder and the tests
  follow it.
- The I2C register table is the function `table_entry` in
  `i2c_av_config.sv`.

## Known limits

- The decoder allows only one read in flight. This costs the processor
  bandwidth on SRAM reads (about 5 cycles per word), but it is simple and
  cannot reorder data.
- The SRAM controller's three-cycle access is conservative for a 10 ns part.
- The I2C master does not support clock stretching. The two target chips do
  not need it.
- The video decoder assumes a well-formed ITU-R 656 stream with at least 240
  active lines per field. It does not check the protection bits of the XY
  code.
