# Kestrel: FPGA logic for a vision-guided micro-UAV

Kestrel is a small autopilot board built around a Zynq (ARM cores plus programmable
logic). It has two cameras, a GPS, gyros and four serial lines to ordinary hobby RC
equipment: servos, receivers and motor controllers. The processor should not have to
handle every pixel, and it should not have to bit-bang the RC lines in real time.
This RTL is the programmable-logic side of the board. It has two jobs:

* **Glue for the RC lines.** Each of the four lines repeats a frame forever from
  registers the processor writes. A line can run either of two protocols:
  * SBUS: 16 servo channels in an inverted 100 kbit/s serial frame;
  * DShot-600: a pulse-width coded motor command.
* **Camera pre-processing.** The raw 1080p Bayer stream is reduced in hardware to
  two things the processor can afford to read:
  * a *window of focus*: a cropped, optionally decimated piece of the raw image,
    written into a pair of buffers through the cache-coherent port;
  * an *edge map*: a one-bit-per-pixel map of the quarter-size grayscale image
    (960 x 540), written through a high-performance memory port.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. It comes with
a self-checking testbench per block in `tb/`, and three whole-design testbenches.

```
          AXI4-Lite (processor GP port)
                 |
           axi_gp_regs ----- ctrl (struct) ---------------------------+
             |        \                                               |
   sbus_regfile        swap_req / status                              |
   (in sbus_sender)                                                   |
             |                                                        |
  sbus_sender --+--> line mux x4 --> rc_out[3:0]                      |
  dshot_tx x4 --+                                                     |
                                                                      |
  camera (cam_valid/cam_sof/cam_data[9:0])                            |
     |                                                                |
     +--> window_capture --> axi_burst_writer (ACP attrs) --> acp_*   |
     |                                                                |
     +--> edge_pipeline:                                              |
            bayer_gray -> frame_window -> gauss_blur                  |
                       -> frame_window -> gradient4                   |
                       -> frame_window -> thin_threshold              |
                       -> edge_packer -> axi_burst_writer (HP) --> hp_*
```

## One clock

The whole design runs from a single clock, nominally 100 MHz. The board's clock plan
uses three clocks:

* 100 MHz for the camera pixels;
* 25 MHz for the quarter-rate grayscale stages;
* 100 kHz for SBUS.

Here these are all replaced by strobes on the one clock:

* a valid/ready handshake between the image stages;
* a divide-by-1000 bit enable for SBUS;
* cycle counters for DShot.

This removes every clock-domain crossing. The price is that the image stages after
grayscale conversion are clocked 4x faster than they need to be. The camera's own
pixel clock (68 MHz at 1080p) must be brought into this clock domain before
`cam_valid`. That crossing, like the MIPI CSI-2 receiver, is outside this RTL.

All flip-flops use a synchronous, active-high `rst`. The LUT-RAM register file and the
line-buffer memories are not reset.

## Edge detection (`edge_pipeline`)

This is the largest and least obvious part of the design. It is a simplified Canny
detector that works on a stream, so no frame is ever stored. It has four passes:

1. grayscale conversion;
2. 5x5 Gaussian blur;
3. gradients in four directions;
4. thinning and threshold.

The blur, gradient and thinning passes each need a 5x5 neighbourhood, so each of them
sits behind its own `frame_window`.

### Grayscale from Bayer (`bayer_gray`)

The sensor delivers rows that alternate `B G B G ...` and `G R G R ...`, starting with
blue at (0,0). Each 2x2 cell becomes one luminance sample:

    Y = (307*R + 302*G1 + 302*G2 + 113*B) >> 4

The weights are a /1024 fixed-point version of 0.30 / 0.295 / 0.295 / 0.11. They sum
to 1024, so a full-scale 10-bit input gives a full-scale 16-bit output (1023 -> 65472).

One previous raw line is held in a `line_buffer` (`RAW_W` x 10 bits). A one-pixel
register completes the 2x2 window. A sample is produced on odd rows at odd columns,
so 1920 x 1080 becomes 960 x 540, with at most one output every second clock. The
stage cannot be stalled, because the camera does not wait.

### The 5x5 window and the frame edges (`frame_window`)

`frame_window` keeps four previous lines in four chained `line_buffer`s of
`IMG_W + 2` entries, plus a 5x5 register array that shifts left by one column per step.
It outputs `out_win[row][col]`, where row 0 is the oldest line. The hard part is the
border. Outside the image, each window must repeat the nearest edge pixel, so the
output image is exactly `IMG_W x IMG_H`.

The block handles this by stepping over an extended grid of `(IMG_H+2) x (IMG_W+2)`
positions. The window centre lags the input by two lines and two columns.

* **Right and bottom edges.** At the end of every line the block takes two extra
  steps with no input. During those steps `in_ready` is low, and the last column is
  repeated into the window. After the last line it takes two extra lines of such
  steps, repeating the last row. This is where the back-pressure comes from.
* **Top and left edges.** No extra steps are needed here. A row or column select that
  would point above or to the left of the image is clamped to row or column 0 when the
  window is assembled. Those are multiplexers on the window outputs.

Each stage therefore consumes `W*H` samples and takes `(W+2)*(H+2)` steps. The extra
steps show up as `in_ready` going low towards the stage before it.

The grayscale stage is the only one that cannot wait. It produces nothing on even raw
lines and at most one sample per two clocks on odd ones, which leaves plenty of room
for two padding steps per line. The padding lines at the end of a frame have to fit
into the camera's vertical blanking.

If a gray sample is ever refused, `overflow` is set and stays set. `stall_count` counts
the clocks in which a window held off a sample that was ready upstream. Both are
exported, so a system with a different camera timing can check its margin.

Line storage per camera channel at 1080p:

| stage input     | lines x entries x bits | bits    |
|-----------------|------------------------|---------|
| raw, for gray   | 1 x 1920 x 10          | 19,200  |
| gray, for blur  | 4 x 962 x 16           | 61,568  |
| blur, for grad  | 4 x 962 x 18           | 69,264  |
| grad, for thin  | 4 x 962 x 36           | 138,528 |

The total is about 289 kbit, roughly eight 36 kbit block RAMs.

### Gaussian blur (`gauss_blur`)

The kernel is the common 5x5 integer Gaussian:

```
 1  4  7  4  1
 4 16 26 16  4
 7 26 41 26  7
 4 16 26 16  4
 1  4  7  4  1      (sum 273)
```

The weights are made from shifts and adds only:

* 4 and 16 are shifts;
* 7 is `(x<<3) - x`;
* 26 and 41 are a few shifted terms added together.

The division by 273 is a multiplication by the 13-bit constant `0b1111000001111`
(7695) followed by a right shift. This is the single-precision mantissa of 1/273 cut
to 13 bits; 7695 / 2^21 is 0.17 % above the exact reciprocal (2^21/273 = 7681.9).

A 16-bit input needs a shift of 21 to return to a 16-bit range. This design shifts by
`NORM_SHIFT = 19` instead, so the blurred value is an 18-bit number equal to about 4x
the weighted average (273 x 7695 / 2^19 = 4.007). The result saturates at 2^18-1. The block is combinational; the window
registers around it form the pipeline.

### Gradients (`gradient4`)

For each of four lines of five samples through the centre, the block computes one
gradient. The lines are horizontal, vertical, the main diagonal and the anti-diagonal.

1. Find the maximum sample on the line. On a tie, the first one counts.
2. Subtract a minimum that depends on where the maximum is:
   * maximum in the left (or upper) two: subtract the minimum of the centre and the
     two on the other side;
   * maximum in the right (or lower) two: the mirror case;
   * maximum at the centre: subtract the minimum of the other four.

The result is never negative. The top 9 of its 18 bits are kept. The four gradients
travel on as one 36-bit word.

### Thinning and threshold (`thin_threshold`)

The third window holds the 4-gradient vectors. For each direction *d*:

* the pixel is a candidate if its own gradient in *d* is at least as large as the
  gradients in *d* of the other four samples on the line in direction *d*;
* it is an edge in *d* if it is a candidate and the sum of those five gradients is
  greater than `threshold` (12 bits).

The pixel is an edge if any direction says so.

### Packing and addressing (`edge_packer`)

Edge bits are collected 32 per word, with the leftmost pixel in bit 0. Each line is
padded with zero words up to a multiple of eight words, which is one 32-byte burst. A
960-pixel line therefore takes 30 data words plus 2 padding words. Word *w* of line *r*
is written to `base + 4*(r*LINE_WORDS + w)`.

A full map is 540 x 128 = 69,120 bytes. `base` is sampled at the start of each frame,
and `frame_done` pulses after the last word.

## Window of focus (`window_capture`)

Software describes the window with:

* the origin `(x0, y0)` in raw pixels;
* the output size `width x height`, where `width` must be a multiple of 16;
* a decimation `step`: keep every step-th pixel of every step-th line (1 keeps all);
* two 32-byte-aligned buffer addresses.

Matching raw pixels are zero-extended to 16 bits and paired into words, with the first
pixel in the low half. Each word goes to the burst writer with its address:
`base + 2*(i*width + j)` for output pixel (i, j). A 256 x 256 window is 128 KiB per
buffer. The configuration is sampled at the start of each frame.

### Handing a buffer to software

The hardware always owns the buffer it is writing, and software owns the other one.
The handover works like this:

1. Software writes the swap register. `swap_pending` goes high.
2. At the next start of frame, the hardware toggles `write_buf`, so the frame just
   completed now belongs to software, and clears `swap_pending`.
3. Software polls the window status register until `pending` is 0. `write_buf` then
   says which buffer the hardware is writing; the other one is stable until the next
   swap.

The camera is never stalled. The grabber holds one finished word for the writer. If
that word has not been taken by the time the next one is complete, the new word is
dropped and the sticky `overflow` status bit is set.

## AXI write masters (`axi_burst_writer`)

Each writer is fed a stream of {address, data} words through a 32-entry FIFO. It issues
AXI4 INCR bursts of 8 beats of 32 bits with all byte strobes set. This is always one
whole 32-byte cache line, because a partial line cannot be written through the
coherent port. A new burst waits for the previous write response, and a non-OKAY
response sets `resp_error`.

The cache attributes are parameters:

* the window writer uses `AWCACHE=4'b1111` and `AWUSER=5'b00001` (coherent);
* the edge writer uses `4'b0011` and 0.

Both writers assume that the stream's addresses are consecutive within an aligned
8-word group. Both producers guarantee this.

## RC outputs

### SBUS (`sbus_sender`, `sbus_regfile`)

The processor writes 32 registers of 11 bits; only the low 11 bits of each write are
kept:

| register | contents |
|----------|----------|
| 0-15     | servo channels |
| 16       | flags byte, in bits [7:0] |
| 17       | command: bit 0 = send, bit 1 = do not invert the line |

The register file is two 32 x 11 simple-dual-port LUT RAMs written in parallel. This
gives two independent asynchronous read ports.

A frame is 25 bytes: `0x0F`, 22 data bytes, the flags byte and `0x00`. The 16 channels
are laid end to end, LSB first, in a 176-bit field, and data byte *k* is bits
8k..8k+7 of that field. A byte can therefore draw bits from two channels, which is why
two read ports are needed.

Each byte is sent as 12 bits: a start bit, 8 data bits, even parity and two stop bits.
The data bits go MSB first by default (`MSB_FIRST=1`). Set the parameter to 0 for
receivers that expect the usual UART LSB-first order. The UART level (idle high) is
inverted on the line, so the line idles low, unless command bit 1 is set.

One bit lasts `CLK_DIV` = 1000 clocks (100 kbit/s). A frame is 300 bits (3 ms) and is
followed by `GAP_BITS` = 400 idle bits, giving a 7 ms period. The command register is
read again while the end byte is being sent, and any change takes effect at the frame
boundary. While stopped, the sender polls register 17 in the gap, but only once that
register has been written since reset.

### DShot-600 (`dshot_tx`)

The 16-bit frame is {throttle[10:0], telemetry, checksum}, sent MSB first. The
checksum is the XOR of the three nibbles of the first 12 bits. Each bit lasts
`BIT_CYC = 167` clocks (1.67 us). The line is high for `T0H = 63` clocks for a 0 and
`T1H = 125` for a 1, then low for the rest of the bit. Frames are separated by
`GAP_CYC = 500` low clocks. The value is sampled at each frame start; with `enable`
low the line stays low.

### Line selection

`kestrel_top` has one SBUS sender and four DShot transmitters. Line *i* carries SBUS if
`line_is_sbus[i]` is set, DShot otherwise, and is held low unless `line_enable[i]` is
set. `rc_out` is registered.

## Register map (`axi_gp_regs`, AXI4-Lite, byte offsets)

| offset      | access | contents |
|-------------|--------|----------|
| 0x000-0x07C | W      | SBUS registers 0-31 (one per word, bits [10:0]) |
| 0x100-0x10C | R/W    | DShot value, lines 0-3: [11:1] throttle, [0] telemetry |
| 0x110       | R/W    | [3:0] line enable, [7:4] line is SBUS |
| 0x120       | R/W    | window: [0] enable, [7:4] step (reset 1) |
| 0x124       | R/W    | window origin: [11:0] x0, [27:16] y0 |
| 0x128       | R/W    | window size: [11:0] width, [27:16] height |
| 0x12C/0x130 | R/W    | window buffer 0 / 1 base address |
| 0x134       | W      | any write: request buffer swap |
| 0x138       | R      | [0] buffer being written, [1] swap pending |
| 0x140       | R/W    | edge: [0] enable, [27:16] threshold |
| 0x144       | R/W    | edge map base address |
| 0x148       | R      | [15:0] edge frames done, [16] overflow (window or edge), [17] AXI error |
| 0x14C       | R      | [15:0] SBUS frames sent, [16] SBUS frame in progress |
| 0x150-0x15C | R      | DShot frames sent, lines 0-3, [15:0] |
| 0x160       | R      | [15:0] windows completed |
| 0x164       | R      | [15:0] coherent-port bursts, [31:16] HP-port bursts |
| 0x168       | R      | clocks in which an edge-pipeline window stalled its input (padding) |

`WSTRB` is honoured. Unmapped reads return 0. All responses are OKAY.

## Where this departs from the source design

* **One clock domain.** Strobes replace the separate 25 MHz and 100 kHz clocks.
* **One camera channel.** The board has two cameras. The second camera's edge map
  could use the second high-performance port unchanged. Its window, however, would
  share the single coherent port with the first. The grabbers never stall the camera,
  so two windows on the same rows would need an arbiter with about a line of
  buffering in front of that port. That sharing scheme is not built.
* **Blur shift.** The blur normalisation shifts by 19 rather than 13. With a 13-bit
  reciprocal, the shift that gives the intended 18-bit result is 19. `NORM_SHIFT` is
  a parameter, but at 13 the output saturates.
* **The design's own choices.** The source leaves these open:
  * the gradient truncation (the top 9 bits are kept);
  * how ties break in gradients and thinning;
  * the edge-map bit order;
  * SBUS start and end bytes, parity, channel packing and frame gap;
  * the DShot checksum and gap;
  * the register map;
  * the buffer-swap timing (at start of frame);
  * window decimation by skipping pixels;
  * drop-on-overflow instead of stalling the camera.
* **SBUS bit order.** By default SBUS data bits are sent MSB first. Set `MSB_FIRST=0`
  for the LSB-first order most receivers expect.
* **Not included:**
  * GPS/gyro polling, which the source leaves to a soft processor;
  * the soft-core flight controller;
  * the optical-flow engine, which the source sketches only as an idea;
  * the camera's MIPI receiver;
  * the clock PLL.

## Parameters

The defaults are the full-size numbers.

| module | parameter | default | note |
|--------|-----------|---------|------|
| `kestrel_top`, `edge_pipeline` | `RAW_W`, `RAW_H` | 1920, 1080 | raw frame; the gray and edge images are half of each |
| `kestrel_top` | `SBUS_CLK_DIV`, `SBUS_GAP_BITS` | 1000, 400 | |
| `kestrel_top` | `DSHOT_BIT_CYC`, `DSHOT_T0H`, `DSHOT_T1H`, `DSHOT_GAP_CYC` | 167, 63, 125, 500 | |
| `gauss_blur` | `NORM_SHIFT` | 19 | |
| `axi_burst_writer` | `BURST_LEN`, `FIFO_DEPTH` | 8, 32 | |

A 2592 x 1944 sensor mode needs `RAW_W=2592, RAW_H=1944`. That makes the line buffers
larger (about 389 kbit in all), and `tb_kestrel_sxga` runs a full frame at that size.

## Verification

Every block has a testbench `tb/tb_<block>.sv`. Each one:

* compares the block's outputs with a reference model written independently in the
  testbench;
* ends with a `TB_RESULT checks=N failures=M` line;
* has a watchdog.

Supporting files in `tb/`:

* `edge_ref_pkg.sv`: a behavioural model of the whole edge detector (gray, padding,
  blur, gradients, thinning, packing) used by the pipeline and top-level tests;
* `axi_mem_model.sv`: an AXI4 write slave with random back-pressure and protocol checks;
* `sbus_monitor.sv` and `dshot_monitor.sv`: line decoders that check bit timing.

The whole-design testbenches:

* `tb_kestrel_top` runs the top at reduced sizes (32 x 16 raw frames, fast RC
  timing). Over several frames it programs everything through AXI-Lite. It checks the
  edge maps, the window buffers, the SBUS and DShot frames, and the swap handshake. It
  also counts that each mechanism happened at least once: a buffer swap, a
  padding stall, an SBUS/DShot mode switch on a line, a forced window overflow, and
  bursts on both ports.
* `tb_kestrel_full` runs the top with every parameter at its default, on one complete
  1920 x 1080 frame with a 256 x 256 window. Every window word and every edge-map word
  is compared with the model, while SBUS and DShot run at their real bit rates. It
  finishes in well under a minute on a workstation.
* `tb_kestrel_sxga` builds the top for the sensor's 2592 x 1944 mode
  (`RAW_W=2592, RAW_H=1944`) and checks one whole frame the same way: a 1296 x 972
  edge map, with 1296-bit lines padded to 48 words, and a 256 x 256 window.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/kestrel_pkg.sv tb/edge_ref_pkg.sv tb/tb_kestrel_top.sv \
  --top-module tb_kestrel_top -o sim
./obj_dir/sim
```

Replace `tb_kestrel_top` with any other testbench name. Testbenches that do not
use the edge model do not need `tb/edge_ref_pkg.sv`, but it does no harm. Bus
handshake rules (AXI stability, response holding) are written as assertions in
`axi_burst_writer` and `axi_gp_regs`, so `--assert` checks them during every run.
