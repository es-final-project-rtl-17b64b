# BlackjackCounter: a camera-based blackjack card counter on an FPGA SoC

A camera looks down on a blackjack table. Each snapshot of the table is
classified by a small convolutional neural network (CNN) running in FPGA
logic, which names the card it sees (one of 52). Software on the SoC's ARM
processor keeps the Hi-Lo running count from those cards, and the FPGA
shows the count and a "play / wait" hint on six 7-segment digits.

This repository holds the SystemVerilog for the FPGA side of the system:

* the **CNN forward pass** with all its on-chip memories,
* the **display logic** (binary to decimal conversion, 7-segment decoding),
* the **camera path**: capture of the camera's 8-bit pixel bus and
  configuration of its registers over the two-wire SCCB bus,
* an **Avalon-MM slave** through which the processor loads images and
  weights, starts work and reads results.

The processor, its software, the DRAMs, the SD card, the camera module and
the displays themselves are outside the RTL. The top level brings out the
signals where they connect.

## How one card gets counted

```
 camera --pixel bus--> camera_capture --bytes--> board SDRAM (raw frame)
   ^                                                 |
   +--SCCB-- camera_config                  processor: crop, downsample
                                                     |  (software)
                                                     v  Avalon writes
                 avalon_slave --image/weights--> cnn_forward --class 1..52--+
                      ^   |                                                 |
         score write  |   +--- class read <---------------------------------+
       (Hi-Lo in SW)  |
                      +--score--> display_logic --> 6 x seg7_decoder --> HEX0..5
```

1. The processor starts the camera setup (`CTRL` bit 1). `camera_config`
   writes COM7 = 0x04 (RGB output) and COM14 = 0x14 (slowest pixel clock,
   PCLK/16).
2. With capture enabled (`CAMCTL` bit 0), `camera_capture` writes each
   640x480x3-byte frame byte by byte to the raw-frame write port.
3. Software pre-processes the frame into a 300x300 RGB image and writes it,
   with the network weights, into the CNN's memories.
4. `CTRL` bit 0 starts a classification; `STATUS` bit 1 reports the end;
   `CLASS` holds the card, 1..52.
5. Software updates the Hi-Lo count and writes it to `SCORE`; the display
   follows within about 30 clocks.

## The classifier

### Network

| stage | operation | feature map after it |
|---|---|---|
| input | 8-bit RGB image | 300 x 300 x 3 |
| layer 0 | 7x7 conv, ReLU, 2x2 mean pool | 150 x 150 x 3 |
| layer 1 | 7x7 conv, ReLU, 3x3 mean pool | 50 x 50 x 3 |
| layer 2 | 7x7 conv, ReLU, 5x5 mean pool | 10 x 10 x 3 |
| layers 3-5 | 7x7 conv, ReLU (pool 1) | 10 x 10 x 3 |
| linear | W x + b, 300 -> 52 | 52 scores |
| output | index of the largest score | class 1..52 |

Each convolution layer has one 7x7 kernel per colour channel (a depthwise
convolution), so a layer keeps its three channels and holds 7x7x3 weights.
The padding is zero and 3 pixels wide, so every input pixel has an output.
The window is applied without flipping the kernel:

    conv[c](y,x) = sum over ky,kx in 0..6 of  in[c](y+ky-3, x+kx-3) * w[c][layer](ky,kx)

To train with a true (flipped-kernel) convolution, store the kernels
flipped.

The output stage would apply softmax in software terms. Softmax keeps the
order of the scores, so the hardware only finds the largest score. On a
tie, the lower class wins.

### Number formats

* Activations are unsigned 8-bit integers, like the input pixels.
* Weights and biases are signed 32-bit **Q16.16** fixed point.
* Convolution sums are 48 bits wide. The engine shifts each sum right
  arithmetically by 16, clamps negative values to 0 (the ReLU) and clamps
  values above 255 to 255.
* A pooled value is the floor of the mean of the window (`sum / pool²`).
* Linear-layer scores are 48-bit Q16.16 values (8-bit integer times
  Q16.16, plus the bias). They are not rescaled.

Anyone training weights for this hardware must quantise to these rules.
`tb/cnn_ref_model.sv` is a plain behavioural description of exactly this
arithmetic.

### How the work is scheduled (`cnn_forward`)

One `conv_pool_engine` runs all six layers in turn; then one
`fc_argmax_engine` runs the linear layer. Layer outputs alternate between
two buffers. Layer 0 reads the image and writes buffer A. Layer 1 reads A
and writes B, and so on. The linear layer reads B, which holds layer 5's
output. A holds at most 150x150 pixels and B at most 50x50, so no buffer is
image-sized.

`conv_pool_engine` fuses convolution, ReLU and pooling. For each output
pixel it walks the pool window and, for each position in it, the 49 kernel
taps. It reads one pixel word (all three channels) and three weights per
clock and accumulates three products. At the end of a window it clamps the
result and adds it to the pool sum. At the end of a pool window it writes
the mean. Reads take one clock, so results trail the address counters by a
two-stage pipeline. The engine never stalls.

| part | clocks at the default size |
|---|---|
| layer l | out_dim² · pool² · 49 (+2) |
| six conv layers | 4 410 000 + 1 102 500 + 122 500 + 3 · 4 900 = 5 649 700 |
| linear layer | 52 · 300 = 15 600 (+2) |
| one classification | about 5.67 M clocks = 113 ms at 50 MHz (8.8 per second) |

This meets the target of 4 classified frames per second.

### Memories

| memory | words x bits | bytes |
|---|---|---|
| image | 90 000 x 24 | 270 000 |
| feature buffer A / B | 22 500 x 24 / 2 500 x 24 | 67 500 / 7 500 |
| conv weights, 3 banks | 3 x 294 x 32 | 3 528 |
| linear weights | 15 600 x 32 | 62 400 |
| linear biases | 52 x 32 | 208 |
| total | | 411 136 (of 512 KiB on chip) |

All memories are `bram_sdp`: one write port and one read port with a
one-clock registered read. The image and the weights are written only by
the processor. The feature buffers are written only by the engine.

## Processor interface (`avalon_slave`)

The interface is an Avalon-MM slave with 32-bit data and 20-bit word
addresses. It has a fixed read latency of one clock and no waitrequest.
`address[19:17]` selects a region and `address[16:0]` is the offset:

| region | offset | contents |
|---|---|---|
| 0 image | y·300 + x | `{8'b0, B, G, R}` (channel 0 in bits 7:0) |
| 1 conv weights | ch·512 + layer·49 + ky·7 + kx | Q16.16 |
| 2 linear weights | class·300 + (y·10 + x)·3 + ch | Q16.16, class 0..51 |
| 3 linear bias | class | Q16.16 |
| 4 registers | 0 `CTRL` (W) | bit0 start classification, bit1 start camera setup |
| | 1 `STATUS` (R) | bit0 CNN busy, bit1 class valid, bit2 camera setup busy, bit3 last frame complete |
| | 2 `CLASS` (R) | card 1..52 |
| | 3 `SCORE` (RW) | signed 16-bit running count |
| | 4 `CAMCTL` (RW) | bit0 capture enable |
| | 5 `FRAMES` (R) | frames captured |
| | 6 `DISPBUF` (R) | the display buffer |

Memory regions are write-only; reads of them return 0. Writing the image or
the weights during a classification corrupts that classification.

## Camera path

**Capture (`camera_capture`).** The camera sends one byte per pixel clock
on 8 data lines. VSYNC high marks a frame and HREF high marks valid bytes.
The pins are sampled on the rising edge of the camera's own PCLK. In that
clock domain, each valid byte becomes one 10-bit entry `{kind, byte}` of a
16-entry dual-clock FIFO (`async_fifo`), and so do each frame start and
frame end. The FIFO uses Gray-coded pointers with two-flop synchronisers.
The system clock side pops one entry per clock. It therefore keeps up with
any PCLK below the system clock, including the camera's maximum of
27.648 MHz (27.6 MB/s) against 50 MHz. PCLK must be running when reset is
released, because the PCLK-domain reset is released through a synchroniser.

A frame is captured only if capture was enabled when its start entry
arrived. Its bytes go to byte addresses 0, 1, 2, ... in arrival order. At
the end of the frame, `frame_ok` reports whether exactly 921 600 bytes
came. Bytes beyond that count are dropped. The write port has no
back-pressure: the SDRAM side must take one byte per PCLK period on
average.

**Configuration (`camera_config`, `sccb_master`).** The settings table is
a parameter and defaults to COM7 = 0x04 and COM14 = 0x14. Each entry
becomes one SCCB 3-phase write: start, ID 0x42, register, value, stop. The
master releases SDA for the ninth bit of each byte and does not check the
camera's answer. SCL runs at 100 kHz, and SDA is open drain (`sda_oe = 1`
pulls it low).

## Display

The display buffer has six 4-bit digits (digit i in `disp_buf[4i+3:4i]`):

| digit | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| shows | letter 1 | letter 2 | letter 3 | hundreds or `-` | tens | units |

The letters read `PLy` (play) when the count is 1 or more, and `HLd`
(hold/wait) otherwise. A negative count shows `-` in place of the hundreds
digit, with its magnitude clamped to 99; positive counts are clamped to
999. `display_logic` loops without pause: it captures the score, converts
it with the sequential shift-and-add-3 converter `double_dabble` (11
clocks) and writes the buffer. Codes 0-9 are digits; codes A-F are the
glyphs P, L, y, H, d and minus. `seg7_decoder` drives segments
`{g,f,e,d,c,b,a}` active low.

## What follows the original proposal, and what was chosen here

The following come from the proposal:

* the hardware/software split;
* the 50 MHz clock and the 4 frames/s target;
* the camera format (640x480, 3 bytes per pixel, one byte per PCLK, 8
  data pins, active-high VSYNC/HREF);
* the two camera register settings;
* the Avalon connection;
* the CNN layer kinds (convolution, ReLU, mean pooling, linear,
  softmax-based class choice);
* 7x7 kernels, three channels, six convolution layers, one 10x10x3 -> 52
  linear layer and 4-byte weights;
* the 300x300x3 image, which fits the proposal's 270 000-byte image budget;
* six 4-bit display digits split into three letters and three decimal
  digits, converted by double dabble.

These are choices of this design:

* the order of the layers and the pooling factors 2, 3, 5, 1, 1, 1;
* per-channel kernels;
* Q16.16 weights and 8-bit saturating activations;
* the linear-layer bias memory (the bias term is in the layer's formula
  but not in the memory budget);
* the fused engine and the ping-pong buffers;
* the register map;
* the display letters, play threshold and sign handling;
* the SCCB device ID and bit rate;
* the clock-domain crossing of the camera bus.

The proposal's network listing leaves its middle open, and this design
fills it in. The RTL therefore fixes an architecture that trained weights
must match. To use another layer plan, change `POOL`. Its pooling
factors must take `IMG_DIM` to 10. More layers or kernels need changes to
`cnn_forward`.

Not in the RTL:

* the processor software (pre-processing, Hi-Lo counting, file transfer);
* the SDRAM controllers;
* the camera's XCLK and PWDN pins.

## Files

| file | contents |
|---|---|
| `rtl/bjc_pkg.sv` | shared constants, types, glyph codes, address map |
| `rtl/blackjack_counter_top.sv` | top level |
| `rtl/cnn_forward.sv` | CNN sequencer and memories |
| `rtl/conv_pool_engine.sv` | convolution + ReLU + mean pooling engine |
| `rtl/fc_argmax_engine.sv` | linear layer and class selection |
| `rtl/bram_sdp.sv` | simple dual-port RAM |
| `rtl/avalon_slave.sv` | Avalon-MM slave and registers |
| `rtl/display_logic.sv`, `rtl/double_dabble.sv`, `rtl/seg7_decoder.sv` | display path |
| `rtl/camera_capture.sv`, `rtl/async_fifo.sv`, `rtl/camera_config.sv`, `rtl/sccb_master.sv` | camera path |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/cnn_ref_model.sv` | behavioural reference of the network |
| `tb/sccb_monitor.sv` | SCCB bus decoder for testbenches |

## Simulating

Every testbench checks its module against values it computes itself. Each
one ends by printing `TB_RESULT checks=N failures=M`. Run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/bjc_pkg.sv tb/tb_cnn_forward.sv --top-module tb_cnn_forward -Mdir obj -o sim
./obj/sim
```

`tb_blackjack_counter_top` runs the whole system at its default size. It
covers camera setup, one full 640x480 frame captured at 27.6 MHz PCLK while a 300x300 image
is classified, the class compared against `cnn_ref_model`, the Hi-Lo
update and the display. It takes under a minute. It also counts each
mechanism and fails if one never occurs:

* pooling by 2, 3, 5 and 1;
* zero padding, ReLU clamping and saturation;
* both camera register writes and a complete frame;
* the play hint, the wait hint and a negative count.

`tb_cnn_forward` runs a reduced 60x60 network, pooling by 2, 3, 1, 1, 1, 1.
The module testbenches use small parameters to stay fast.
