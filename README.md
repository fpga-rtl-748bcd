# Camera-driven rhythm-game clicker: circle detection by FFT on an FPGA

In the rhythm game *osu!* the player clicks on hit circles at the moment a
shrinking "approach circle" reaches the hit circle's size. This design lets
an FPGA do the clicking. A camera watches the game screen, and the approach
circles are drawn in red by a custom game skin. The FPGA does four things:

1. It keeps only the red pixels of each camera frame.
2. It looks in that one-bit image for a ring of one fixed radius, using a
   circle Hough transform computed with 2D FFTs.
3. It waits an adjustable delay, then sends the ring's centre over UART to a
   microcontroller. The microcontroller turns the centre into a touch-screen
   tap on the game computer.
4. It shows the camera picture, the filtered picture or the detection result
   on a VGA monitor.

Everything is SystemVerilog (IEEE 1800-2017) for one 100 MHz clock. The
original used a vendor FFT core. It is replaced here by a small radix-2 FFT
engine, so the whole design can be simulated with Verilator alone.

## Data flow

```
camera pixels ──► color_threshold ──► thresholded-image RAM (320x240x1)
   (RGB444, x, y)        │                        │
                         │               image_processing ──► click_control ──► uart_tx ──► microcontroller
                         ▼                        │  (ring centre)   (delay, cooldown)
                    display_mux ◄─────────────────┘  (result image)
                         │
                    framebuffer (320x240x12) ──► vga_output ──► monitor
```

`fpga_top` wires these together. The camera capture logic is not part of
this design. The top takes a pixel stream as input: `cam_valid`, `cam_x`,
`cam_y`, `cam_rgb` and a one-cycle `cam_frame_done` at the end of each
frame. The microcontroller is not part of it either. The top drives only
the `uart_txd` line.

## How a ring is found

### The idea

To find a ring of radius r, every set pixel of the binary image votes for
all points at distance r from it. The centre of a real ring collects one vote
from each of its pixels, so it becomes the maximum. This voting is the
correlation of the image with a ring-shaped kernel. Done directly, it costs
O(n²) operations. In the frequency domain it is one product per point:

    result = IFFT2( FFT2(image) · K ),   K = FFT2(ring)

K never changes, so it is stored in a ROM (`kernel_rom`). Only the image
has to be transformed and transformed back.

### Sizes and number format

| quantity | value |
|---|---|
| camera / framebuffer | 320 x 240 |
| processed image | 160 x 120 (every other pixel of every other row) |
| transform size | 256 x 128 (next powers of two; the rest is zero padding) |
| matrix memory | 32768 words x 50 bits, single port, 2-cycle read latency |
| word | `{re[24:0], im[24:0]}`, two's complement integers |
| matrix address | `{y[6:0], x[7:0]}` (row-major, 256 words per row) |

Processing at 160x120 keeps the matrix memory at 1.6 Mbit. At the full
320x240, a 512x256 matrix of at least 36-bit words would be needed, about
4.7 Mbit. That is nearly all the block RAM of the FPGA the original was
built on.

No transform is scaled. The forward FFT of a 0/1 image is at most the
number of set pixels (19200 at most). K is at most 56, the number of pixels
in a radius-10 ring. The inverse FFT is not divided by its length, so the
result is 32768 times the vote count. A perfect ring therefore peaks at
56 × 32768 ≈ 1.8 M, well inside the ±16.7 M range of a 25-bit component.
Every value is kept as an integer. After each 1D pass the results are
rounded and stored back in the matrix, so rounding noise builds up. In
simulation, one isolated pixel comes back from FFT→IFFT as 32768 ± about
4000. That is harmless next to the ring peak. It does add a faint halo
around the true centre in the result image.

The transform is cyclic, so the kernel ring is centred on the origin and
wraps around the matrix edges. The correlation peak then lands exactly on
the ring's centre, not offset by the kernel size. Votes that fall off one
edge of the image wrap around to the other. They appear as weak artefacts
near the borders.

### The sequencer (`image_processing`)

One state per step. All submodules share the single-port matrix RAM. The
sequencer routes the active submodule's request (a `mat_req_t` struct:
address, data, write enable) to it.

| state | submodule | what happens | cycles |
|---|---|---|---|
| IDLE | – | wait for `frame_done_in` (ignored while busy) | |
| PIXEL_INPUT | `pixel_input` | copy 160x120 decimated bits; write 0 to the padding | 32 772 |
| FFT | `fft_2d` | 128 row FFTs, then 256 column FFTs, in place | 377 604 |
| MULTIPLY | `elementwise_mult` | (a+bj)(c+dj) with the ROM word, 4 cycles/word | 131 073 |
| IFFT | `fft_2d` | the same with `inverse` set | 377 604 |
| PEAKFIND | `peak_finder` | maximum real part over 160x120, 3 cycles/pixel | 57 602 |
| SEND | – | if peak ≥ `DETECT_THRESH`, pulse `click_out` with x, y | 1 |
| PIXEL_OUTPUT | `pixel_output` | 320x240 framebuffer: `FFF` where value > `OUT_THRESH` | 76 804 |

The whole sequence takes 1 053 461 cycles, 10.5 ms at 100 MHz. The
original's vendor FFT took longer, 14 ms per frame. The multiply and the
peak search spend two cycles waiting for each read. The multiply spends a
further cycle stepping the address, because the RAM has only one port.
Their states (IDLE, READ_WAIT, MULT_WRITE / COMPARE, ADDR_INC) follow the
original.

`DETECT_THRESH` defaults to 28 × 32768: half of the ring pixels must line
up. `OUT_THRESH` defaults to 16 × 32768. The position is reported in the
160x120 grid. The receiver scales it to the screen.

### FFT engine and the row/column wrappers

* `fft_core` is an N-point engine with three phases. LOAD accepts N
  samples, stored at bit-reversed addresses. COMPUTE runs log2(N) stages of
  N/2 radix-2 butterflies, one per cycle, on a register array. UNLOAD emits
  N results in natural order with `m_last` on the last one. The twiddles
  are 18-bit numbers with 16 fraction bits, computed at elaboration. Each
  product is rounded to the nearest integer. Internal words are 32 bits.
* `fft_wrapper` has two forms. With `AXIS_Y=0` it is the row wrapper,
  `fft_wrapper_x`; with `AXIS_Y=1` it is the column wrapper,
  `fft_wrapper_y`. For each line it streams the line out of the matrix RAM
  into its own engine, then writes the results back over the same words.
  For an inverse transform it conjugates the samples going in and the
  results coming out. Results are saturated to 25 bits. One line of L
  words takes 2L + (L/2)·log2 L + 2 cycles: 1538 per row and 706 per
  column.
* `fft_2d` runs the row wrapper (FFT_X) and then the column wrapper
  (FFT_Y).

### Kernel ROM

A pixel (dx, dy) is on the ring when its distance from the centre rounds to
`RADIUS`: (2R−1)² ≤ 4(dx²+dy²) < (2R+1)². With R = 10 the ring has 56
pixels. The ROM word {ky, kx} holds

    K[kx,ky] = Σ over ring pixels of exp(−j·2π·(kx·dx/256 + ky·dy/128))

rounded to integers. Because 128 = 256/2, every phase is a multiple of
2π/256, so one 256-entry cosine table covers all terms. An `initial` block
fills the ROM when the memory is initialised. The ring is symmetric, so K
is real, and the imaginary halves are zero up to rounding.

## Clicking

`click_control` latches a detection and waits 50 ms × max(sw[9:7], 1), which
gives 50 to 350 ms. It then pulses `click_out`. After that it ignores all
detections for a cooldown of 100 ms × (sw[6:4] + 1). The delay lets the
design see the approach ring while it is still large and easy to detect,
and still click when the ring meets the hit circle. The cooldown prevents
repeated clicks on the same circle. `TICKS_PER_50MS` (default 5 000 000)
sets the time base.

`uart_tx` sends x and y as four 8N1 characters at 115200 baud
(`CLKS_PER_BIT` = 868 at 100 MHz), in the order x[15:8], x[7:0], y[15:8],
y[7:0].

## Display

The framebuffer is 320x240 RGB444. `display_mux` chooses what is written
into it:

| switch | effect |
|---|---|
| sw[2] = 1 | the image processor's result image, written after each frame |
| sw[2] = 0, sw[1] = 0 | raw camera pixels |
| sw[2] = 0, sw[1] = 1 | filtered camera pixels: red-passing pixels keep their colour, all others are black |
| sw[0] | `vga_output` shows the framebuffer 2x enlarged at 640x480; otherwise 1:1 in the top-left corner |

`vga_output` produces standard 640x480 at 60 Hz timing with a pixel every
4 clocks. Its outputs lag its counters by one pixel.

`color_threshold` passes a pixel when red > 9, green < 6 and blue < 6, on a
0–15 scale. These thresholds are parameters. The right values depend on the
camera and the screen and have to be tuned on the bench.

## What is this design's own choice

The structure, state sequences, sizes, number format, decimation,
conjugation trick and switch functions follow the system this RTL
implements. The following were chosen here:

* The FFT engine. The original used the vendor FFT core, with a different
  latency: 892 cycles per row plus 5 per pixel. The engine here is a plain
  radix-2 core.
* Clearing the transform padding on every frame. This makes the pixel-input
  step 32768 cycles instead of 19200. Without it, the previous frame's
  result would remain in the padding.
* The kernel spectrum is computed at initialisation rather than loaded from
  a precomputed file.
* These values and rules: the ring radius (10), the detection and display
  thresholds, the colour thresholds, and the UART byte order and baud rate.
  Also the cooldown scale, the click delay for switch value 0, the way a
  filtered pixel is drawn, and the VGA mode.
* Saturation to 25 bits in the multiply and the FFT write-back. The peak
  search compares real parts. Ties keep the first maximum found.
* Every memory has a 2-cycle read latency and reads the old word on a
  write.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/fpga_pkg.sv rtl/fpga_top.sv tb/tb_fpga_top.sv --top tb_fpga_top
./obj_dir/Vtb_fpga_top
```

`tb_fpga_top` runs the whole system at full size and default parameters.
It streams three camera frames, waits out the real 50 ms delay and 100 ms
cooldown, decodes the UART messages, and checks the display modes. It takes
about 20 s. It counts each mechanism and fails if one never happens: the
filter passing and rejecting pixels, detection, the frame-done that is
ignored while busy, the click delay, the detection ignored during the
cooldown, both clicks, the result image, and VGA frames in both modes.

`tb_image_processing` checks the detector on full-size frames. These
contain a ring at a random position, a smaller distracting ring and noise.
It also checks the cycle count of every state. The block testbenches
compare the FFT engine, both wrappers and the 2D transform with directly
computed DFTs. They check the kernel ROM against the ring's spectrum, and
check the multiplier, peak finder, pixel copy steps, UART, click timing,
mux and VGA timing word by word.

## Files

`rtl/fpga_pkg.sv` holds the shared sizes, the `cplx_t` and `mat_req_t`
types, and the saturation function. Each module has its own file in
`rtl/`. Each testbench `tb/tb_<module>.sv` tests the module of the same
name. `tb_bram_sdp` covers both the thresholded-image memory and the
framebuffer.
