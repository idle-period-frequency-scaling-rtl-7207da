# Idle-period clock dividing for a display driver IC

A display driver IC (DDI) lowers the refresh rate of a still image (variable
refresh rate, panel self-refresh) by stretching the vertical front porch: the
number of image lines per frame stays fixed, and a frame at 1 Hz is mostly
idle porch lines. During those lines the DDI processes no new pixels, but its
internal clock keeps toggling through the whole clock network. This core
halves the internal clock during the porch lines of frames that carry no new
image. Dividing is done inside the DDI, so the clock source keeps its
frequency. Line time is unchanged, so the panel timing is unaffected.

The RTL is a synthesizable SystemVerilog model of the digital core:

```
              img_sof/valid/data                       left_line/right_line, line_load
   AP  ──────────────────────────► ddi_function ──► shift_register ──────────────►  column driver
                                   (GRAM inside)         ▲                              (external)
                                        ▲ img_update     │ ce, hsync, window, par
                                        │                │
  cfg_in, scale_en ──► freq_scaling ──ratio_req──► clk_sync_gen ──► hsync, vsync, de, v_cnt (row driver)
                          ▲   (one line ahead)          │
                          └──────── v_cnt, cfg_cur ─────┘  ce / div_clk (divided internal clock)
```

## Frame and line structure

A frame has VBP porch lines, then `vact` image lines, then VFP porch lines.
These three counts come in on `cfg_in` and are taken at every VSYNC. The
frame rate is set by VFP alone. A line lasts `HBP + HSIZE/PPW + HFP` source
clocks. The middle part is the *shift window*, one clock per pixel word.

Default sizes:

| item | value | origin |
|---|---|---|
| resolution | 1440 x 3200 | published |
| source clock | 169.9 MHz | published (not an RTL parameter) |
| dividing ratio in the porch | 2 (maximum) | published |
| pixel | 24 bit | own choice |
| pixels per word (`PPW`) | 2, so 720 words per line and 360 per half | own choice |
| HBP / HFP | 80 / 80 clocks, so 880 clocks per line | own choice |
| VBP | 8 lines | own choice (run-time input) |

With 880-clock lines, 3216 lines make one frame at 60.03 Hz. The lower
rates then need these VFP values (`cfg_in.vfp`, 18 bits):

| frame rate | lines per frame | VFP |
|---|---|---|
| 60 Hz | 3216 | 8 |
| 30 Hz | 6432 | 3224 |
| 15 Hz | 12864 | 9656 |
| 10 Hz | 19296 | 16088 |
| 5 Hz | 38592 | 35384 |
| 1 Hz | 192960 | 189752 |

## Deciding the ratio (`freq_scaling`)

The ratio must be known when a line begins, so the controller always decides
for the *next* line. From the current line number and the frame's VBP and
`vact`, it computes whether the next line is a porch line. On the last line
of a frame, the next line is line 0 of the next frame, so it uses the timing
waiting on `cfg_in`. The request is registered and stays steady for the whole
line. The generator samples it at the end of the line.

Ratio 2 is requested only if all of these hold:

- the next line is a porch line. VBP lines count as porch, as well as VFP lines.
- `scale_en` is high.
- the frame is not an *image update frame*.

An image update frame is a frame in which the AP writes graphic memory.
Writes are slowed down by a divided clock, so scaling must not happen then.
`img_update` is high while an image is being written. It sets a frame flag,
which is cleared at the next VSYNC unless the write is still going on. The
effects are:

- A write that starts in the middle of a frame stops dividing from the next
  HSYNC, for the rest of that frame.
- The line that was running when the write started keeps its ratio.
- A write that runs across a VSYNC makes the new frame an update frame as well.
- The first frame without any write is a self-refresh frame, and its porch
  lines are divided again. That includes its VBP.

## Dividing without changing the line time (`clk_sync_gen`)

The divider is a two-bit down-counter. `ce` is high when the counter is
zero, and the counter is reloaded with `ratio - 1`. So `ce` is high on every
clock at ratio 1, and on every second clock at ratio 2. `clk_gate` is a
latch-and-AND clock gate that turns `ce` into the real divided clock,
`div_clk`. Its rising edges are exactly the `clk` edges at which the `ce`-enabled
registers of the core update. The core itself is written with `clk` plus
`ce`, which is equivalent and easier to simulate. An implementation would
clock the porch-idle logic from `div_clk`. The latch in `clk_gate` is
intentional: it is the standard clock-gating structure, and a library cell
would replace it.

The horizontal counter counts source-clock periods but advances only on `ce`,
by the current ratio (1 or 2). A line therefore ends after `HTOTAL` source
periods at either ratio. A new ratio takes effect only at a line boundary:

- The divider reload uses the ratio of the period that is just starting.
- The new ratio is loaded at the last enabled cycle of the old line.
- So the first cycle of every line is an enabled cycle (an HSYNC), whatever
  ratio the old line and the new line have.

HBP, the shift window and HFP must all be even, so that divide-by-2 periods
line up with the boundaries. This is checked at elaboration.

An assertion checks that an active line never runs at ratio 2. The image
path needs every clock of the window.

## Shift registers: serial in the image, parallel in the porch (`shift_register`)

The line is held in two halves, left and right, of `HW` words each. Words
enter at index `HW-1` and move toward index 0, so that after a full pass
word *i* of a half sits at index *i*. There are three kinds of line:

| line | ratio | what happens in the shift window | clocks used |
|---|---|---|---|
| active | 1 | new words from memory: left half, then right half | 2·HW |
| porch, update frame | 1 | left half recirculates, then right half | 2·HW |
| porch, self-refresh | 2 | both halves recirculate together | HW divided = 2·HW source |

During the porch the panel is still sent the last image line on every line,
to limit leakage in the pixel cells. Recirculation does this with no data
source: the word that leaves index 0 comes back in at `HW-1`. After `HW`
shifts every word is back where it started. At ratio 2 there are only half
as many clock edges in the window. Shifting the two halves one after the
other would not finish, but shifting them at the same time does, in the same
time. This is why the ratio is capped at 2: a higher ratio would not leave
enough edges even for the parallel pass.

`line_load` is a one-clock strobe that follows the last shift of the line.
It comes at clock `HBP + 2·HW` of the line at ratio 1, and one clock earlier
at ratio 2. The column driver latches `left_q` / `right_q` on it.

## Image path (`ddi_function`, `gram`)

The AP writes an image as a stream of words, line after line and left to
right. `img_sof` marks the first word and `img_valid` qualifies each word.
The stream goes into `gram`, a simple dual-port synchronous RAM that holds a
whole frame: 3200 x 720 words of 48 bits, 110.6 Mbit at the default size.
`img_update` stays high from the first word until `vact · WPL` words have
been written.

In every active line, the block reads that image line from the RAM, one word
per clock:

- The read is issued one clock before the shift window, which covers the
  RAM's one-clock latency.
- The word read at `h = HBP-1+k` is shifted in at `h = HBP+k`.
- The RAM returns the old word when a read and a write hit the same address.

So a line that the AP rewrites while it is being displayed may show part of
the old image and part of the new one. The DDI's own image processing is not
modelled: pixel words pass through unchanged.

## Top level (`ddi_top`) interface

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | source clock; asynchronous reset, active low |
| `cfg_in` (`vtiming_t`: `vbp`, `vact`, `vfp`, 18 bits each) | in | vertical timing for the next frame |
| `scale_en` | in | enables porch clock dividing |
| `img_sof`, `img_valid`, `img_data[47:0]` | in | image stream from the AP |
| `hsync`, `vsync` | out | line / frame start strobes; qualify with `ce` |
| `de` | out | shift window of an active line |
| `ce`, `div_clk` | out | divided clock enable, gated divided clock |
| `ratio` | out | ratio of the current line (1 or 2) |
| `active_line`, `v_cnt` | out | line type and line number, for the row driver |
| `update_frame` | out | running frame is an image update frame |
| `left_line[360]`, `right_line[360]`, `line_load` | out | line halves and latch strobe for the column driver |

The column and row drivers, the panel and the AP are outside the RTL. Their
signals are the ports above.

After reset, the generator starts line 0 of a frame on the second clock,
with the timing then on `cfg_in`. Control registers are reset. Pixel
registers and the RAM are not.

## Simulation

All files are plain SystemVerilog 2017. The package `rtl/ddi_pkg.sv` must
come first, and the rest is found with `-y rtl`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/ddi_pkg.sv tb/tb_ddi_top.sv --top-module tb_ddi_top
./obj_dir/Vtb_ddi_top
```

Each bench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

| bench | what it covers |
|---|---|
| `tb_freq_scaling` | ratio decision against a reference, over frames with mid-frame writes, writes across VSYNC, timing changes, scaling off |
| `tb_clk_sync_gen` | constant 16-clock lines under random ratio changes, enables per line, VSYNC period, timing change at frame boundary, gated clock edges = enables |
| `tb_shift_register` | word placement after an active line, serial and parallel refresh (also mid-line rotation state), `line_load` timing |
| `tb_gram` | random write/read-back, latency, hold, read-during-write |
| `tb_ddi_function` | image stream into memory, `img_update`, word *k* of each line in the *k*-th window cycle |
| `tb_ddi_top` | end to end at 16 x 6 pixels, with random, all-white and 4x1 checkerboard images: every line's timing, ratio, enables, latched contents; counts divided lines, parallel and serial refreshes, updates holding scaling off, frame-rate change, scaling off |
| `tb_ddi_full` | default size: one full image written (2,304,000 words), then a self-refresh frame with all 3200 lines checked, 16 divided porch lines, clock-edge count. About 6 million clocks, under a minute |
| `tb_ddi_framerates` | 60 to 1 Hz sweep with the real line counts and 16-clock lines |

In a self-refresh frame, the frame-rate sweep measures this share of
internal clock edges removed:

| 60 Hz | 30 Hz | 15 Hz | 10 Hz | 5 Hz | 1 Hz |
|---|---|---|---|---|---|
| 0.25 % | 25.1 % | 37.6 % | 41.7 % | 45.9 % | 49.2 % |

Each value is `(VBP+VFP)/(2·lines)`. These are clock-edge counts, not power.
What they save depends on how much of the dynamic power is clock-network
power that follows the divided clock. The published evaluation used gate-level
power analysis of a production DDI, which this RTL cannot reproduce. It
reports dynamic power savings that grow from about 3 % at 60 Hz to about
11 % at 1 Hz. The 3 % at 60 Hz suggests that the porch of that chip is much
longer at 60 Hz than the 16 lines assumed here. Set VBP/VFP to match a real
panel.

## How far this follows the published design

These parts are as published:

- the block structure: frequency-scaling controller, clock & sync generator,
  graphic memory, left/right shift registers;
- dividing by 2 only in the porch, from the HSYNC after the porch begins;
- full-rate image lines;
- no dividing in image-update frames;
- refresh of the last line in the porch, with the two halves in parallel
  when the clock is divided;
- the resolution and the frame rates.

These parts are this design's own, because nothing is given for them:

- the clock-enable plus clock-gate form of the divider;
- all horizontal timing, word width and pixel format;
- the AP stream interface and how an update frame is detected;
- refresh by recirculation, and serial refresh in porch lines of update frames;
- the one-line look-ahead;
- the memory organisation;
- reset behaviour and the `scale_en` switch.

Not modelled:

- image processing inside the DDI;
- the AP link protocol;
- the analog column/row drivers and the panel;
- power.
