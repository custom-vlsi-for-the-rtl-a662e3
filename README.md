# Compositing DAC: band-buffered alpha compositing and video output

This is SystemVerilog RTL for the compositing DAC ("C-DAC") of a PC
multimedia accelerator. In that accelerator a sprite engine does not render
into a frame buffer. It renders the screen in horizontal **bands of 32
scanlines** and streams, for each band, layers of image fragments that may
overlap. The C-DAC blends the fragments into a small band buffer as they
arrive. Meanwhile the previous band is shown from a second buffer through
colour look-up tables and video DACs. The full frame is never stored.

The chip's key figures, which the RTL keeps as its defaults:

| | |
|---|---|
| display | 1344 x 1024 at 75 Hz, 24-bit colour, optional line sequential stereo |
| compositing | 4 pixels per clock (320 Mpixel/s at 80 MHz) |
| band buffer | 1344 x 32 pixels, double buffered; 10752 words of 4 pixels |
| colour LUTs | 3 x 256 x 8, loaded over a 16-bit "media bus" |
| DACs | 3 x 8 bit, 135 MHz |

## Compositing: front to back with a transparency buffer

Each buffer pixel holds a colour `B` (premultiplied, 8 bits per channel)
and a transparency `B_BETA`, where beta = 1 - alpha and 0xFF means "nothing
in front yet". An incoming fragment has colour `A` and coverage `A_ALPHA`.
Fragments arrive front to back, so each new one goes *under* what is
already stored:

    C      = B + B_BETA * A                 (per channel, saturating at 0xFF)
    C_BETA = B_BETA * (1 - A_ALPHA)

All products are 8-bit fractions in which 0xFF stands for 1.0, so that
`0xFF * x = x`. The "special multiplier" computes `round(a*b/255)`
without a divider: `t = a*b + 128; y = (t + (t >> 8)) >> 8`.

**Cursor mode.** When the sprite engine flags a group as cursor mode, every
pixel whose coverage is exactly 0x01 is a cursor pixel. A cursor pixel
inverts the stored colour (`C = ~B`) and leaves beta unchanged, which draws
an XOR cursor over whatever is there. Other pixels in the group composite
normally.

**Pipeline.** The sprite port takes a 1x4 group every clock: one buffer
address, four RGB pixels, four coverages and the cursor flag. In cycle `t`
the address reads the colour buffer and the beta buffer. In cycle `t+1`
the stored words arrive and enter 12 colour compositors (4 pixels x R, G,
B) and 4 beta compositors. Each compositor is pipelined over `STAGES`
clocks (default 2). The results are written back to the same address at
the end of cycle `t+1+STAGES`. Nothing forwards results inside this
read-modify-write loop. **The sprite engine must not send the same address
again within `STAGES+1` clocks**, or the second group reads stale data.
An assertion in `address_control` reports any group that breaks this rule.

## Buffers, pixel valid and the ping-pong swap

Two colour buffers, M and N, take turns. One is composited (the *build*
buffer) while the other is displayed. Each is built from three 10752 x
32-bit arrays (R, G, B; four 8-bit pixels per word, pixel 0 in bits 7:0)
and a 10752 x 1-bit **pixel-valid** array, one bit per four-pixel word. One
10752 x 32-bit **beta buffer** holds the four betas of a word. It is single
buffered because only compositing uses it. Every array has one write port
and one read port, each with its own address.

An address is 14 bits: `I = addr[8:0]` is the word (four-pixel group) in
the line, 0..335, and `J = addr[13:9]` is the line in the band, 0..31.
The row decoder maps the address to `J*336 + I`. Writes with `I >= 336` are
dropped, and reads of such an address return 0.

Pixel valid is what lets the buffers be reused without a clearing pass:

* A compositor write-back sets the word's pixel-valid bit.
* A word whose bit is clear counts as empty. Its stored colour reads as 0
  and its beta as 0xFF, whatever the arrays hold. So the beta buffer never
  needs clearing.
* The display shows an empty word as black. On the last pixel clock of each
  word it writes that word back empty (colour 0, valid clear), through the
  display buffer's otherwise idle write port. When the display has shown a
  whole band, that buffer is empty and ready to be built again.
* After reset, `address_control` sweeps both colour buffers empty, which
  takes 10752 clocks. `sp_ready` stays low until the sweep is done.

`band_swap` pulses one clock after the last active pixel of the displayed
band. The buffer select `comp_sel` (0 = M is being built) toggles on that
pulse. A group already in the pipeline finishes in the buffer it started
in. The sprite engine must have finished band *k+1* by the time band *k*
has been shown: 32 lines, about 400 us at 135 MHz.

## Display path

`crt_controller` produces the raster: 1344 x 1024 active, totals 1688 x 1066
(75 Hz at a 135 MHz pixel clock), positive HSync and VSync.
`display_addr_gen` turns the raster position into a buffer row `J` and a
line pixel count (LPC). From these it forms the word address `{J, LPC/4}`
and the pixel number `LPC%4`. `display_mux` takes the displayed buffer's
word and picks the pixel, or black if the word is empty. That pixel then
goes through the three `color_lut`s to the DACs.

**Line sequential stereo.** The sprite engine draws the left eye's image
in the left half of each buffer line (LPC 0..671) and the right eye's image
in the right half (LPC from 672). In this RTL each buffer row is shown on
two raster lines: left eye on the even line, right eye on the odd one. Each
of the 672 pixels in a half is held for two pixel clocks to fill the line.
A band then covers 64 raster lines and the buffers swap every 64 lines.
`stereo_eye` tells the shutter glasses which eye's image is on screen.

Latency from the raster position to the LUT output (DAC codes) is 4 clocks.
The analog outputs, HSync, VSync and `stereo_eye` follow one clock later and
are aligned with each other.

## Media bus

`media_bus_if` is a 16-bit, PCI-like target. The initiator raises `frame`
for one clock with the address on `ad_in` and `wr` giving the direction.
After that, each clock in which `irdy` and `trdy` are both high moves one
word, and the address increments. `frame` drops in the cycle of the last
transfer, and, as on PCI, only while `irdy` is high (an assertion checks
this). Writes have no wait states. Reads insert one wait state per word,
then drive `ad_out` with `ad_oe` high.

| address | register |
|---|---|
| 0x0000 | CTRL: bit 0 display enable, bit 1 stereo mode (both 0 after reset) |
| 0x0001 | STATUS (read only): bit 0 `comp_sel`, bit 1 buffer sweep after reset in progress |
| 0x0100-0x01FF | red LUT |
| 0x0200-0x02FF | green LUT |
| 0x0300-0x03FF | blue LUT (entry in bits 7:0, read back supported) |

The LUTs are not initialised by reset. Load them before you enable the
display.

## Files

| file | contents |
|---|---|
| `rtl/cdac_pkg.sv` | sizes, CRT timing constants, word and RGB-word types, address split |
| `rtl/cdac_top.sv` | the chip: everything below wired together |
| `rtl/compositing_engine.sv` | 12 colour + 4 beta compositors, buffer multiplexer |
| `rtl/color_compositor.sv`, `rtl/beta_compositor.sv`, `rtl/special_multiplier.sv` | per-pixel arithmetic |
| `rtl/buffer_mux.sv` | steering between buffers M and N, empty-word handling |
| `rtl/color_buffer.sv`, `rtl/beta_buffer.sv`, `rtl/scan_ram.sv` | the arrays |
| `rtl/address_control.sv` | port addresses, write-back delay, buffer select, reset sweep |
| `rtl/crt_controller.sv`, `rtl/display_addr_gen.sv`, `rtl/display_mux.sv` | raster and scan-out |
| `rtl/color_lut.sv` | 256 x 8 LUT |
| `rtl/video_dac.sv` | **behavioural model** of an 8-bit video DAC (`real` output, 0.7 V full scale) |
| `rtl/media_bus_if.sv` | control bus target |
| `rtl/pipe_delay.sv` | delay-line helper |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/cdac_pkg.sv \
        tb/tb_cdac_top.sv --top-module tb_cdac_top -Mdir obj
    ./obj/Vtb_cdac_top

Replace the testbench name to run another one. `tb_cdac_top` runs the whole
chip at full size, with no parameter overrides, for three frames (about 5.4
million clocks, roughly 10 s). Frame 0 runs with the display disabled,
frame 1 in normal mode and frame 2 in stereo mode. The testbench acts as the
sprite engine: 1500 random groups per band, stacked on top of each other,
including cursor groups and opaque groups. It also acts as the media DSP,
loading the LUTs and switching modes over the bus. It checks every active
pixel, every blanking and sync output and every analog level against its
own model of the compositing equations. It counts how often each mechanism
occurs and fails if one never does. These mechanisms are: compositing,
compositing over a stored pixel, cursor pixels, saturation, empty words
shown, band swaps, stereo lines, blanking while the display is disabled,
LUT loads and bus reads.

`tb_band_fill_workload` measures the compositing rate. It has the
sprite engine composite three full layers over a whole band, one group
every clock with no gaps (32256 groups, 129024 pixels in 32256 clocks). That
is well inside the 54016-clock period in which one band is displayed. It
then reads the band back through the display path and checks every pixel.

`tb_special_multiplier` checks all 65536 operand pairs. The other block
testbenches use random stimulus plus directed corner cases.

## Where this RTL goes beyond, or departs from, the original chip

The following are this design's own choices, made where the chip
description gives no detail:

* **One clock.** The chip composites at 80 MHz, scans out at 135 MHz and
  runs the media bus at 40 MHz. This RTL runs on a single clock, meant to
  be the pixel clock. The raster advances on clocks with `pix_ce` high, but
  the video output is not held between enabled clocks, so tie `pix_ce` high
  when `clk` is the pixel clock. Separate clock domains would need
  synchronisers and a clock-crossing display FIFO, which are not here. The
  PLL/clock generator itself is not part of the RTL.
* **Arrays.** The arrays are plain synchronous RAM with a one-clock read.
  The chip's arrays are full-custom SRAM (with a DRAM version planned) with
  self refresh. Refresh is not modelled.
* **Invented details.** The pipeline depth (`STAGES = 2`), adder
  saturation, the divide-by-255 multiplier, the pixel-valid clearing
  scheme, the reset sweep, the band-swap rule, the stereo line and pixel
  doubling, the CRT blanking intervals, the DAC levels, the media-bus
  signals and the register map are all choices made for this RTL.
* **Empty words in the colour path.** The colour compositors see the
  substituted beta (0xFF) and a zero colour for an empty word. In the
  chip's diagram the pixel-valid bit reaches only the beta compositor.
* **Buffer width.** The chip's block diagram labels the scanline buffers
  "1360 x 32". The RTL uses the 1344-pixel line (336 words) that the array
  sizes, the addressing and the display format all agree on.
* **No hazard logic.** The compositor pipeline has no read-after-write
  protection (see "Pipeline" above).

Not modelled at all: the I/O pads and package, the analog parts of the DACs
beyond the behavioural model, and the clock generator.
