# A VGA frame buffer for a serially loaded digital picture frame

A digital picture frame built on a small FPGA board. A workstation reduces a
JPEG picture to 640x480 pixels of one byte each. It run-length codes the
pixels into (colour, count) byte pairs and sends them over a 9600-baud serial
line. A soft processor on the FPGA decodes the pairs and writes the pixels
into a frame buffer. Dedicated hardware shows that frame buffer on a VGA
monitor, continuously and without help from the processor.

This repository holds the RTL of that hardware: a slave on the processor's
on-chip peripheral bus (OPB). It turns the board's single 16-bit asynchronous
SRAM into an 8-bit-per-pixel frame buffer. Its one hard problem is that the
SRAM has one port. The video generator must get a word every four system
clocks, always on time, while the processor reads and writes bytes, half
words and words through the same pins. The sections below are about how
those two are interleaved.

The processor, the bus, the UART, the interrupt controller, the program
memory and the clock generator are vendor IP and are not part of this RTL.
The SRAM chip and the video DAC are board parts. The processor's software
(decoding the serial stream) is reproduced only inside the end-to-end
testbench.

## Pixels and the frame buffer

Each pixel is one byte in RGB332 form:

| bits | 7:5 | 4:2 | 1:0 |
|------|-----|-----|-----|
| field | red | green | blue |

The workstation keeps the top 3 bits of red and green and the top 2 bits of
blue. For example, the 24-bit colour `BF BF BF` becomes `101 101 10` =
`0xB6`. On output each field goes to the top bits of a 10-bit DAC code. The
remaining DAC bits are constant zero, so 24 of the 55 outputs of the video
block never change.

The frame buffer is linear: pixel (x, y) is the byte at offset `640*y + x`
from the base address `0x0080_0000`. One SRAM word holds two neighbouring
pixels. The even pixel is in the upper byte, because the OPB is big-endian:
bit 31 is the lowest byte address. A whole picture needs 307,200 bytes. The
address decode compares bits 31:20 only, so the processor sees a 1 MB window
(0x0080_0000 to 0x008F_FFFF).

## Sharing the SRAM: `memoryctrl`

Every SRAM pin is registered in the pads (`pad_io`). A read therefore
returns its data two clocks after the controller asks for it. If the
controller requests a read in clock n, the pins strobe the SRAM in n+1, and
the data sits in the pad's read register in n+2.

**Video has absolute priority.** `vreq` is high for one system clock per
even pixel address. In that clock the SRAM cycle belongs to video:
`videocycle` switches the address multiplexer to the video word address and
both byte lanes are enabled. Two clocks later `video_ce` latches the word
into the video data register. Video cycles never wait, so the video path
needs no handshake.

**The processor fits into the gaps.** An access begins when the address
decode (`cs`) fires while the sequencer is idle. The OPB address, byte
enables, data and direction are registered at that clock edge. The sequencer
then tries to issue SRAM cycles. In any clock with `vreq` high it issues
nothing and waits.

| access | SRAM cycles | acknowledge, clocks after select (no video) |
|--------|-------------|-----------------------------------------------|
| 8- or 16-bit write | 1 | 2 |
| 32-bit write | 2 (even half word, then odd) | 3 |
| 8- or 16-bit read | 1 | 4 |
| 32-bit read | 2 | 5 |

Each clock of video in a waiting state adds one clock. An access counts as
32-bit when all four byte enables are set. The second SRAM cycle of a 32-bit
access raises `hihalf`, which picks the odd half word.

**Reads overlap.** A 32-bit read issues its second half one clock after the
first, before the first half's data has come back. The sequencer therefore
follows the two halves separately:

- The main sequencer (`MC_COMMON`, `MC_RD_HI`, `MC_RD_HI2`, `MC_RD_HI3`,
  `MC_XFER`) follows the second half.
- A two-stage shift register (`ra1`, `ra2`) follows the first half.

Two clocks after the first read, `ce0` loads the data into both halves of
the 32-bit OPB read register. Two clocks after the second read, `ce1`
overwrites the low half. A one-cycle read leaves the same half word in both
halves; the master picks its byte lanes. `MC_XFER` acknowledges the access.
In the following clock it also clears the read register, because the OPB
ORs the slaves' read data together.

The first half of a read never waits once it has been issued. Only the
second half can be held off by video (it waits in `MC_RD_HI`). So `ce0` and
`ce1` never fire in the same clock, and an assertion checks this. A second
assertion checks that no processor write ever shares a clock with a video
cycle.

If the master drops `OPB_select`, the sequencer returns to idle from any
state. As in the original state machine, a read strobe issued in the clock
where select drops still goes out.

## The video path: `vga` and `vga_timing`

`vga_timing` counts pixels (0 to 799) and lines (0 to 523) on the pixel
clock. From these counts it makes the syncs, blanking and a pixel address
into the frame buffer. The address counter:

- runs **three pixels ahead** of the display (`SRAM_DELAY`);
- holds during horizontal blanking, at the base of the next line;
- is held at zero from the end of the last visible line until the next
  frame starts.

A word is requested whenever the pixel address is even. The latency from
the address to the DAC pins is four pixel clocks:

1. The address is valid in pixel p. The request is sampled on the system
   clock in p's second system clock.
2. The SRAM is read, and the word is on the bridge's video data register
   from the start of pixel p+2.
3. The word is loaded into the 16-bit shift register at the end of pixel
   p+2. The upper byte is shown in p+3 and the lower byte in p+4, after a
   shift.
4. The colour fields pass through the output registers: one more pixel
   clock.

Blanking has one register of delay on the way out. Combined with the
three-pixel lead, pixel 0 of a line therefore appears on the first clock
with `VIDOUT_BLANK_N` high. The syncs are delayed two extra pixel clocks "for
the DAC pipeline", so the horizontal sync pulse lands three pixel clocks
after its nominal position (96 clocks wide). The vertical sync is two lines
wide.

The request is made by sampling the pixel clock as data on the system clock
(`video_req <= pix_clk & vreq`). This works only because the pixel clock is
exactly half the system clock and rises together with it. It produces one
request clock per even pixel. Words are also fetched during blanking, which
wastes bandwidth but keeps the logic simple. On visible pixels video takes
1 SRAM cycle in 4. While the address is held during blanking it takes 1 in
2.

Timing parameters (typed, default = 640x480): `H_ACTIVE` 640,
`H_FRONT_PORCH` 16, `H_BACK_PORCH` 48, `H_TOTAL` 800, `V_ACTIVE` 480,
`V_FRONT_PORCH` 11, `V_BACK_PORCH` 31, `V_TOTAL` 524, `SRAM_DELAY` 3. The
vertical total of 524 lines is kept as designed, one line short of the
common 525. At a 25 MHz pixel clock the frame rate is 59.6 Hz.

## The bridge: `opb_xsb300`

The bridge is the top module. It holds `vga`, `memoryctrl` and `pad_io`,
plus the glue:

- the address decode;
- one register each for the OPB address, byte enables, write data and
  direction;
- the SRAM address multiplexer: the video word address, or else byte
  address bits 20:2 followed by `addr[1] | hihalf`;
- the write-data multiplexer: OPB bits 31:16 for the even half word, 15:0
  for the odd one;
- the byte-lane enables (`OPB_BE[3:2]` or `[1:0]`, both for video);
- the video data register;
- the OPB read register.

`UIO_errAck`, `UIO_retry` and `UIO_toutSup` are always 0. `OPB_seqAddr` is
not used.

Ports:

- OPB slave side: `OPB_Clk`, `OPB_Rst`, `OPB_ABus[31:0]`, `OPB_BE[3:0]`,
  `OPB_DBus[31:0]`, `OPB_RNW`, `OPB_select`, `OPB_seqAddr`,
  `UIO_DBus[31:0]`, `UIO_xferAck`, `UIO_errAck`, `UIO_retry`,
  `UIO_toutSup`.
- `pixel_clock`: must be `OPB_Clk`/2, phase aligned (25 MHz for a 50 MHz
  bus).
- SRAM pins: `PB_A[19:0]` (word address), `PB_D[15:0]` (inout), and
  `PB_UB_N`, `PB_LB_N`, `PB_WE_N`, `PB_OE_N`, `RAM_CE_N`, all active low.
- Video DAC pins: `VIDOUT_CLK`, `VIDOUT_RCR/GY/BCB[9:0]`,
  `VIDOUT_BLANK_N`, `VIDOUT_HSYNC_N`, `VIDOUT_VSYNC_N`.

Parameters: `C_BASEADDR` (default `32'h0080_0000`; bits 31:20 are decoded).
`C_HIGHADDR` (default `32'h00FF_FFFF`) records the bus-level range and is not
used by the decode.

Reset is active high. The OPB request registers reset synchronously. The
sequencer, the pads, the video path and the OPB read register reset
asynchronously.

## Files

| file | contents |
|------|----------|
| `rtl/xsb_pkg.sv` | default timing numbers, widths, `rgb332_t`, the sequencer state type |
| `rtl/opb_xsb300.sv` | top: the OPB bridge |
| `rtl/memoryctrl.sv` | SRAM arbiter and sequencer |
| `rtl/pad_io.sv` | registered SRAM pins and data-bus tristate |
| `rtl/vga.sv` | video requests, pixel shift register, DAC output registers |
| `rtl/vga_timing.sv` | counters, syncs, blanking, frame-buffer address |
| `tb/*_tb.sv` | one self-checking testbench per module (below) |
| `tb/sram_model.sv` | behavioural model of the asynchronous SRAM |

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M`, has a
watchdog, and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/xsb_pkg.sv rtl/vga_timing.sv rtl/vga.sv rtl/memoryctrl.sv \
  rtl/pad_io.sv rtl/opb_xsb300.sv tb/sram_model.sv tb/opb_xsb300_tb.sv \
  --top-module opb_xsb300_tb -Mdir obj_top
obj_top/Vopb_xsb300_tb
```

The module testbenches build the same way from the package, the module (and
`vga_timing.sv` for `vga`) and their testbench file. All run at the default
640x480 timing. The whole set takes well under a minute.

- `vga_timing_tb` compares every output, on every pixel clock of a whole
  frame, with a closed-form description: sync windows, blanking, and the
  address (`640*L + 3 + p` on visible pixels, held in blanking, zero in
  vertical blanking). It also checks the frame period and the visible pixel
  count.
- `vga_tb` plays the memory path with a hashed memory pattern. It checks
  every visible pixel of two frames, the sync widths and the number of
  video requests per frame (265,600).
- `memoryctrl_tb` draws random video request patterns and checks every
  output in every clock against the expected issue, latch and acknowledge
  clocks. It covers the four contention-free latencies and an aborted
  transfer.
- `pad_io_tb` checks the pin registers, the drive/release rule of the data
  bus and the read register.
- `opb_xsb300_tb` is the end-to-end and full-size test:
  - 8/16/32-bit writes and reads against a byte-level reference memory,
    with the acknowledge latencies of the table above;
  - a 640x480 picture of random colour runs, run-length coded into
    (colour, count) pairs of at most 120 pixels, then decoded by a model of
    the receiving program into 307,200 byte writes after a clear-screen
    pass, all while video is running;
  - 32-bit read-back of every sixteenth line;
  - a comparison of every visible pixel of the next frame on the DAC
    outputs.

  It also counts and requires video stalls of processor accesses, video
  requests during the second half of 32-bit accesses, every access size and
  direction, the read register returning to zero after each transfer, and
  blanking intervals. It takes about 10 s.

## Where this RTL departs from the original design, and what it leaves out

- The original instantiates vendor primitives for the pads (pad
  flip-flops, fast 24 mA buffers) and codes the arbiter as a one-hot state
  machine. Here it is written as
  behavioural RTL: registers and a tristate assignment for the pads, an
  enumerated sequencer for the arbiter. Cycle behaviour is the same;
  pad placement and drive strength are left to constraints.
- Registers that had no reset (the video pipeline, the DAC output
  registers, the video data register) are reset here.
- The timing values of the original are kept: `V_TOTAL` 524, sync offsets
  and fetching during blanking. Its timing comments name a
  25.175 MHz pixel clock, but the video request logic only works with a
  pixel clock of exactly half the bus clock (the bus runs at 50 MHz), so
  these testbenches run it at 25 MHz.
- Not included: the processor and its software, the OPB bus, UART,
  interrupt controller, program BRAM, clock generator, the SRAM chip and
  the video DAC. A system around this bridge must provide the OPB master,
  a pixel clock at half the bus clock, and an active-high reset.
- The picture quality is limited by the 8-bit palette. Dithering on the
  workstation side would help; it needs no change to this hardware.
