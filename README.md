# Low-power PAL video capture with a clock-gated colour converter, and a 3/2 bilinear zoom

This is the video-in path and the zoom-in engine of an FPGA video system. It
takes a PAL camera signal, digitised by a video decoder chip into a
CCIR 601/656 (ITU-R BT.656) 4:2:2 stream, converts it to progressive RGB
frames in external memory, and enlarges a region of interest of a stored
frame for display.

The main idea is a power saving in the YCrCb-to-RGB converter. Real pictures
hold long runs of identical neighbouring pixels. While its input does not
change, a converter that is clocked every cycle only recomputes the same
output. A small **clock controller** keeps the previous input in registers,
compares it with the current one and stops the converter's clock while they
are equal. The converter then sees clock edges only when a new value
actually arrives.

```
 27 MHz video clock                                               | 100 MHz system clock
                                                                  |
 vid_data ─► bt656_decoder ─► chroma_422_to_444 ─► clock_controller ─► ycrcb_to_rgb ─► deinterlacer ─► async_line_buffer ─► mem_wr_*
 (BT.656)        │              (Cb Y Cr Y → Y,Cr,Cb)   │ gclk ──────┘  (gated clock)   (weave)          (2 line banks)  |   (frame store
                 └─► video_timing (new line / field / frame, line index)                                                |    write port)
                                                                                                                         |
                                                       zin_* (ROI from frame store) ─► zoom_in (3/2 bilinear) ─► zout_*  |
```

`video_zoom_top` wires these blocks together. The memory controller, DDR
memory, processor, bus, display controller and video DAC of the complete
system are not part of this RTL. The top brings their connections out as
valid/ready streams: `mem_wr_*` carries captured pixels to the frame store,
`zin_*` carries a region of interest read back from it, and `zout_*`
carries the enlarged picture on to the display path.

## The clock-gated converter

`clock_controller` has three 10-bit registers, one each for Y, Cr and Cb,
all clocked by the system clock. Their outputs are the converter's data
inputs. Each register's input is XORed with its output, and the three
results are ORed into an "input changed" flag. The converter's clock is the
system clock ANDed with that flag.

A bare AND of a clock with a combinational compare would glitch, and it
would also clock the converter while the registers are still being loaded.
Two flip-flops are therefore added:

* `chg` (rising edge) stores the compare result of period *n* for one
  period;
* `en_n` (falling edge) passes `chg` on while the clock is low, so the AND
  gate's enable is stable through the whole high phase. This is a
  flip-flop form of an integrated clock gate.

The resulting timing, where `p` is the 4:4:4 pixel the controller sees:

```
edge n    : registers <= p(n);       chg <= (p(n) != p(n-1))
negedge n : en_n <= chg
edge n+1  : if en_n: converter output <= f(registers) = f(p(n))
```

Every output therefore equals the ungated converter's output, delayed by one
clock. The testbenches check this cycle by cycle. Reset clears the
registers and holds the gate open, so the converter takes the synchronous
reset and then one edge to convert the cleared registers.

In the video-in path the 4:4:4 stage presents a new pixel only every second
27 MHz clock, and it holds that pixel in between. Flat picture areas
therefore keep the converter idle almost all the time. Over one full PAL
frame of the test picture (flat colour blocks plus a noisy strip) the
converter clock is shut on 94 % of video clocks. In the 800 ns example of
`tb_gating_example` (six input changes during 22 clock periods) the
converter gets 6 edges, an average of 7.5 MHz against 27.5 MHz, which cuts
its switching term by 73 %. These numbers are
clock-edge counts. Their effect on power follows P = A·C·V²·F only for the
converter itself: the controller's own registers still toggle on every
clock.

Gated clocks need care in an FPGA flow. `gclk` should be mapped to a clock
buffer with an enable (for example BUFGCE), or the gate can be replaced by a
clock enable on the converter's output registers. That saves less power,
but it is simpler to time.

## Colour conversion

`ycrcb_to_rgb` computes

```
R = 1.164(Y-16) + 1.596(Cr-128)
G = 1.164(Y-16) - 0.813(Cr-128) - 0.391(Cb-128)
B = 1.164(Y-16) + 2.018(Cb-128)
```

for 10-bit inputs. The offsets are scaled to 64 and 512, and the
coefficients are integers with 10 fraction bits (1192, 1634, 833, 400,
2066, in `vz_pkg`). Each result is rounded to 8 bits, clamped to 0..255
and registered. The latency is one clock of whatever clock drives the
block. The results are within one LSB of the exact equations.

## Zoom-in core

`zoom_in` enlarges by 3/2 in both directions. Each 2×2 block of input
pixels becomes a 3×3 block:

```
a  b        a        (a+b)/2          b
c  d   →   (a+c)/2   (mean of row above and row below)  (b+d)/2
            c        (c+d)/2          d
```

A 480×384 region of interest thus fills a 720×576 PAL frame. The middle
pixel is the mean of the two horizontally interpolated values above and
below it. All means round half up. Pixels and lines are taken in disjoint
pairs.

Datapath, one word per RGB pixel (`NCH` components of `CH_W` bits side by
side):

```
          ┌─► FIFO1 (line n)   ─► H-interp ─► FIFO3 (line n, widened)   ─┬──────────────► ┐
in ─► FIFO┤   demux by line                                             ├─► V-interp ─► FIFO5 (new line) ─► output mux ─► out
          └─► FIFO2 (line n+1) ─► H-interp ─► FIFO4 (line n+1, widened) ─┴──────────────► ┘
```

Each horizontal interpolator (`zoom_hinterp`) reads two pixels and writes
three. The output FSM waits until FIFO3 and FIFO4 each hold a whole widened
line (720 words). It then sends the pair's three lines back to back:

1. **line n**: FIFO3 is emptied to the output. In the same cycles the
   vertical interpolator writes mean(FIFO3, FIFO4) into FIFO5. FIFO4 is
   recirculated (its head is popped and pushed back), so line n+1 is still
   there afterwards.
2. **new line**: FIFO5 is emptied to the output.
3. **line n+1**: FIFO4 is emptied to the output.

While one pair is sent, the next pair already fills FIFO1/FIFO2 and the
free part of FIFO3. With `out_ready` high, the three lines of a pair (2160
pixels) leave at one pixel per clock. `out_eol` marks the end of each
output line. `out_kind` says which of the three lines the pixel belongs to
(0 = line n, 1 = new line, 2 = line n+1). The input must deliver an even
number of lines of `LINE_W` (even) pixels. Choosing the region of interest
(pan) is left to whatever reads the frame store.

## Video decoding and the clock-domain crossing

* `bt656_decoder` looks for the timing reference sequence 3FF 000 000 XY.
  It latches F (field), V (vertical blanking) and H (1 = EAV, 0 = SAV) from
  XY and flags wrong protection bits on `trs_err`. After the SAV of a line
  with V = 0, it passes the next 1440 words on as active samples, tagged
  Cb/Y0/Cr/Y1.
* `video_timing` turns the decoded codes into `new_line`, `new_field` and
  `new_frame` strobes (a new frame begins with field F = 0), plus the active
  line index within the field.
* `chroma_422_to_444` emits (Y0, Cr, Cb) when Cr arrives and (Y1, Cr, Cb)
  when Y1 arrives. Chroma is repeated for the second pixel, and the pixel
  value is held between pixels.
* `deinterlacer` places each pixel at column x and frame line
  2·line + field ("weave"). Writing both fields into one frame store
  rebuilds the progressive frame. It drops lines beyond 576 and pixels
  beyond 720.
* `async_line_buffer` crosses from 27 MHz to 100 MHz with two line banks.
  The video side fills one bank, records the bank's line number and flips
  a toggle flag. The system side sees the flag through a two-flip-flop
  synchroniser, streams the bank out, and flips its own flag back. The bank
  contents and the line number are not synchronised, because they do not
  change while the other side owns the bank. If both banks are still
  owned by the reader when a new line starts, that whole line is dropped
  and `lb_overflow` pulses. At 100 MHz with a ready port the reader is far
  faster than the 13.5 MHz pixel rate, so overflow happens only when the
  frame-store port is held off.

## Top-level interface (`video_zoom_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_vid`, `rst_vid` | in | 1 | 27 MHz video clock, synchronous reset |
| `vid_data` | in | 10 | BT.656 words from the video decoder |
| `vid_trs_err` | out | 1 | timing code with bad protection bits |
| `vid_field`, `vid_vblank` | out | 1 | F and V of the last timing code |
| `vid_new_line`, `vid_new_field`, `vid_new_frame` | out | 1 | strobes at the SAV of an active line |
| `conv_clk_en` | out | 1 | converter clock-gate enable (for power monitoring) |
| `lb_overflow` | out | 1 | a line was dropped in the line buffer |
| `clk_sys`, `rst_sys` | in | 1 | 100 MHz system clock, synchronous reset |
| `mem_wr_valid/ready` | out/in | 1 | frame-store write stream handshake |
| `mem_wr_data` | out | 24 | RGB pixel (`rgb_t`: r, g, b) |
| `mem_wr_x`, `mem_wr_line`, `mem_wr_last` | out | 10, 10, 1 | column, progressive line, end of line |
| `zin_valid/ready`, `zin_data` | in/out, in | 1, 24 | zoom input stream |
| `zout_valid/ready`, `zout_data` | out/in, out | 1, 24 | zoom output stream |
| `zout_eol`, `zout_kind` | out | 1, 2 | end of output line, line kind |

Parameters: `LINE_PIX` (720), `FRAME_LINES` (576), and `ZOOM_LINE_W`
(480, the zoom's input line length). All streams transfer on
`valid && ready`. A stream's outputs hold while valid is high and ready is
low.

## What is this design's own choice

The block structure follows the architecture this RTL implements: the
clock-controller registers, XOR/OR/AND gating, the conversion equations,
and the zoom's FIFO layout with its FSM. The following points are not
fixed by that description and were chosen here. Treat them as the first
things to revisit:

* the two extra flip-flops in the clock gate (see above);
* 8-bit RGB output from 10-bit inputs, the fixed-point coefficients,
  rounding and clamping;
* the 3/2 zoom factor with disjoint pairs, read from a 2×2 → 3×3
  illustration, and the midpoint-mean interpolation;
* the PAL geometry (720×576, 1440 samples per line), taken from BT.601 and
  BT.656;
* BT.656 code decoding and protection-bit checking, sample-repeat chroma
  upsampling, weave deinterlacing, the line-buffer hand-over protocol and
  its drop-on-overflow policy. These blocks were specified only by what
  they do;
* all handshakes and stream formats at the top-level ports, and
  synchronous resets.

Known differences from the reference architecture:

* The reference block diagram of the clock controller labels the converter
  outputs as 10 bits wide. Here R, G and B are 8 bits, as in the reference
  simulation traces and in a 24-bit frame store.
* The reference zoom works on the luminance and chrominance of the video.
  Here it works on the stored RGB pixels. It treats each of the `NCH`
  components the same way, so it would work just as well on Y/Cr/Cb
  words.
* The reference power example reports 7 MHz average converter clock and a
  72 % gain for its stimulus. The stimulus of `tb_gating_example` is only
  shaped like it (the exact sample values are not known), and it gives
  7.5 MHz and 73 %.
* The reference system's power, maximum-frequency and resource results
  come from a Virtex-5 / Virtex-II Pro implementation with vendor IP. They
  are not reproduced here: no place-and-route or power analysis is part of
  this RTL.
* Region-of-interest selection, the processor set-up of the video decoder
  chip over I²C, and the display path are outside this RTL.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=…
failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_ycrcb_to_rgb` | 5000 random and corner samples against the floating-point equations (±1 LSB), reset, 1-clock latency |
| `tb_clock_controller` | gated converter equal to an ungated one every cycle; gate shut for constant input and open for one edge per change; single-component changes |
| `tb_gating_example` | the 800 ns example: edge counts and average frequency of the gated vs free-running converter |
| `tb_bt656_decoder` | F/V/H of every code, protection error flag, exact active samples with phase and first flag |
| `tb_chroma_422_to_444` | pixel pairs with shared chroma, first flag, value held between pixels |
| `tb_video_timing` | new line/field/frame strobes and line index over two frames |
| `tb_deinterlacer` | weave positions, last flag, dropped extra pixels and out-of-frame lines |
| `tb_async_line_buffer` | lines across 27/100 MHz with back-pressure; forced overflow drops exactly one line |
| `tb_zoom_in` | 480-pixel lines against a reference model, back-to-back rate, random input and output stalls |
| `tb_video_zoom_top` | full default size: one PAL frame through the video path (all 576 lines, every pixel), a forced overflow, a protection error, and a 480×384 → 720×576 zoom with stalls; each mechanism must occur |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          rtl/vz_pkg.sv tb/tb_video_zoom_top.sv --top-module tb_video_zoom_top -o sim
./obj_dir/sim
```

The full-size test simulates about 40 ms of video time in a few seconds.
Verilator has two-state logic, so every register that is read is reset.
Testbench inputs change on the inactive clock edge, so that the design and
the testbench never race on the sampling edge.
