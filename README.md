# Real-time SAD stereo correlator on an AMBA AHB peripheral bus

A stereo camera pair sees the same scene from two viewpoints. A point in the
scene appears in the left image a few pixels to the right of where it appears in
the right image. That horizontal offset is the *disparity*, and depth is inversely
proportional to it. This design finds the disparity of every pixel in hardware,
one pixel per clock. It uses window matching by the sum of absolute differences
(SAD). The correlator sits behind an AHB wrapper with DMA, on the peripheral bus
of a small processor-centred SoC. A keypad starts a run and a TFT-LCD controller
shows the resulting depth map.

The architecture follows the paper "A Platform-Based SoC Design for Real-Time
Stereo Vision". That paper describes the correlator's structure in detail but
describes the system around it (wrapper, bus, display, keypad) only by function.
Where this RTL had to choose something itself, the sections below say so.

## The matching problem

For a pixel `n` of the left image, compare the `WW x WH` window that ends at `n`
with the same-sized window in the right image shifted left by `d`, for every
`d = 0..MAXD`:

```
C(n, d) = sum_{r=0}^{WH-1} sum_{c=0}^{WW-1} | L[n - r*SL - c] - R[n - r*SL - c - d] |
disparity(n) = the d with the smallest C(n, d)   (the smallest d on a tie)
```

Images arrive as raster streams. `L[i]` is the i-th left pixel in scan order and
`SL` is the scan line length, so `n - r*SL` is the pixel `r` rows above `n`.
Pixels before the start of the frame count as 0. The defaults are `SL = 240`,
`WW = WH = 9` and `MAXD = 31`, with 8-bit grey pixels.

A direct evaluation costs `WW*WH*(MAXD+1)` = 2,592 absolute differences per
pixel. The correlator reduces this with two ideas.

**Column SADs.** Write the window SAD as a sum of `WW` column SADs:

```
S(n, d) = sum_{r<WH} | L[n - r*SL] - R[n - r*SL - d] |
C(n, d) = sum_{c<WW} S(n - c, d)
```

Pixel `n - c` was the newest pixel `c` clocks earlier, so `S(n-c, d)` was
computed then. Each clock therefore computes only one new column SAD per
disparity, which is `WH*(MAXD+1)` = 288 absolute differences. It keeps the last
`WW` column SADs of each disparity in a shift buffer.

**Streams in shift registers.** All the pixels a column SAD needs sit at fixed
distances behind the newest pixel:
- the left column is at distances `0, SL, 2*SL, ...`;
- the right columns are at the same distances, plus `d`.

One long shift register per camera therefore holds all the storage. Its taps
feed every disparity in parallel.

## Correlator structure (`sad_correlator`)

```
left_pix, right_pix
      |
  sad_psr          left:  SL*(WH-1)+1 pixels      -> 1 column of WH pixels
                   right: SL*(WH-1)+MAXD+1 pixels -> MAXD+1 columns of WH pixels
      |
  sad_dc
    sad_column_dc    MAXD+1 SAD units: WH |a-b| + adder tree          [reg]
    sad_shift_buffer (MAXD+1) x WW column SADs, newest first          [reg]
    sad_window_dc    MAXD+1 adder trees over WW column SADs           [reg]
      |
  sad_mc           tree of 2-input min cells over MAXD+1 SADs         [reg]
      |
  disparity, min_sad
```

The correlator has only adders, subtractors and comparators. It has no
multipliers and no control state.
- `tree_adder` builds the balanced adder trees. Each level adds pairs, and the
  inputs are padded with zeros to a power of two.
- `sad_mc` builds the min tree the same way, padding with the largest SAD. At
  each min cell the left (lower-`d`) input wins on equal values, so the smallest
  such `d` comes out.

**Pairing of the two images.** The correlator holds one left window fixed and
moves the right window. This is how the paper's hardware description feeds its
calculator: one left window and `MAXD+1` right windows. The paper's SAD formula
is written the other way round: it fixes the right window and moves the left
one. Both compare the same pairs of windows; they differ only in which image
the disparity map is aligned with. Here the map is aligned with the left image.

**Borders.** Every pixel gets a disparity. Near the left edge, a window reaches
into the end of the previous row. Near the top, it reaches into zeros from
before the frame. A consumer that cares should ignore the first `WW-1` columns
and `WH-1` rows, plus the first `MAXD` columns of the right-image search range.

### Timing

- Throughput: one pixel pair per clock when `in_valid` is high. Gaps in
  `in_valid` are allowed. The pipeline never stalls and has no back-pressure.
- Latency: the disparity of a pixel accepted at a clock edge is registered 4
  edges later (`sad_pkg::SAD_LATENCY`), with `out_valid`. The four registers are
  the column SAD, the shift buffer, the window SAD and the minimum.
- Frame start: pulse `clear` for one clock while no pixel is in flight. It zeroes
  the shift registers and the shift buffer, so a frame never sees the previous
  one.
- Widths: a column SAD is `8 + clog2(WH)` bits, a window SAD adds `clog2(WW)`
  bits, and the disparity is `clog2(MAXD+1)` bits. At the defaults these are
  12, 15 and 5 bits.

### Storage at the defaults

| Part | Contents | Bits |
|---|---|---|
| left shift register | 1,921 x 8 | 15,368 |
| right shift register | 1,952 x 8 | 15,616 |
| shift buffer | 32 x 9 x 12 | 3,456 |

The paper lists its PSR size as `SL*(WH-1)+MAXD`. The extra element here holds
the newest pixel itself. The shift registers are plain registers. An FPGA
mapping would normally turn the long runs between taps into RAM-based delay
lines, and that change does not alter the behaviour.

## SAD wrapper (`sad_wrapper`)

The wrapper turns the correlator into a bus peripheral. It has three parts:
- an AHB slave for its registers;
- an AHB master for DMA (`ahb_single_master`);
- a control unit that runs the transfer.

For each 32-bit word it does the following:
1. Read one word of the left image and one of the right image. Each word holds
   4 pixels, the first pixel in bits 7:0.
2. Feed the 4 pixel pairs to the correlator, one per clock.
3. Collect the disparities, one byte each, packed the same way, into a 4-word
   result FIFO.
4. Write each finished word back. Writes take priority over reads, so the FIFO
   never holds more than two words.

When every result word has been written, it sets DONE and raises `irq`.

| Offset | Register | Bits |
|---|---|---|
| 0x00 | CTRL | [0] START (write 1; ignored while busy), [1] IRQ_EN |
| 0x04 | STATUS | [0] BUSY, [1] DONE (write 1 to clear), [2] BUS_ERROR (write 1 to clear) |
| 0x08 | LEFT_ADDR | byte address of the left image |
| 0x0C | RIGHT_ADDR | byte address of the right image |
| 0x10 | RESULT_ADDR | byte address of the disparity image |
| 0x14 | NUM_WORDS | image size in words (pixels / 4) |
| 0x18 | CYCLES | clocks taken by the last run |

The image width must equal `SL`. DMA uses single, non-pipelined word
transfers, so one transfer takes at least 4 clocks. A run costs about 6.25
clocks per pixel when the memory adds 0–2 random wait states per transfer.
The correlator itself would take 1 clock per pixel, so the bus limits the
throughput. Burst transfers would be the first thing to add for speed.

The paper says only what the wrapper does and which parts it has. The register
map, packing, transfer type and FIFO are this design's own. In the paper, the
processor saves the disparities into memory after the interrupt. Here the
wrapper writes them back by DMA itself, and the interrupt marks the end of the
run.

## The peripheral module (`stereo_periph_top`)

The SoC has three parts on two AHB buses:
- a processor module: an ARM9 core that runs the control software and turns
  disparities into depth;
- a memory module with SDRAM and static memory controllers;
- this peripheral module.

The processor reaches the peripheral bus through an AHB-to-AHB bridge.
`stereo_periph_top` is the peripheral bus and everything on it:

| Bus agent | Role | Address `HADDR[31:28]` |
|---|---|---|
| TFT-LCD DMA | master 0 (highest priority) | |
| SAD wrapper DMA | master 1 | |
| bridge from the processor bus (`br_*` ports) | master 2 (parking master) | |
| memory module (`mem_*` ports) | slave 0 | 0x0 |
| SAD wrapper registers | slave 1 | 0x8 |
| keypad controller | slave 2 | 0x9 |
| TFT-LCD registers | slave 3 | 0xA |

**`ahb_bus`: arbiter, decoder and multiplexers.** Grants go by fixed priority and
change only at clocks where HREADY is high. An address that matches no slave gets
a zero-wait OKAY. All masters use SINGLE transfers, so a grant may move between
any two transfers. The priority order, the memory map and the default response
are this design's choices. The LCD comes first because a display underrun is
visible, while the SAD run only takes longer.

**`irq_priority`.** It forms one interrupt request and an `irq_id`, ranked
SAD wrapper > TFT-LCD > keypad > UART. This is the order the paper gives. The
UART belongs to the processor module, and its interrupt line enters as
`uart_irq`.

**`keypad_ctrl`.** It scans a 4x4 key matrix, one column every `SCAN_DIV`
clocks, and then decides:
- a key seen in two consecutive full scans, after a scan with no key, is one
  stroke;
- the stroke latches the key code, sets PENDING and raises `irq`.

Registers: 0x00 KEY ([7:0] code, [8] PENDING, write 1 to clear) and 0x04 CTRL
([0] IRQ_EN). The paper only names this controller. A key stroke starts a run.

**`tft_lcd_ctrl`.** A DMA engine fills a 512 x 32-bit FIFO from the frame
buffer. That is 16,384 bits, the memory size the paper reports for its LCD
controller. The timing generator runs at one pixel every `PIX_DIV` clocks and
drives HSYNC, VSYNC and DE for a 320x240 panel. The frame buffer holds 8-bit
grey pixels, and each is output as RGB565 with R = G = B.

When a frame ends, the controller:
- sets STATUS.FRAME (and `irq` if it is enabled);
- empties the FIFO;
- latches FB_ADDR;
- prefetches the next frame during vertical blanking.

Because FB_ADDR is latched only at that point, software can switch buffers
without tearing. An empty FIFO during active video shows black and sets
UNDERRUN.

Registers: 0x00 CTRL ([0] ENABLE, [1] IRQ_EN), 0x04 FB_ADDR and 0x08 STATUS
([0] FRAME, [1] UNDERRUN, both write 1 to clear). Panel size, porches, pixel
format and colour conversion are all assumptions.

### One run, as software sees it

1. Enable the keypad interrupt and the display.
2. On the keypad interrupt, read KEY. Load or point to a stereo pair. Program
   LEFT/RIGHT/RESULT_ADDR and NUM_WORDS. Write CTRL = 3.
3. On the SAD interrupt (`irq_id = 0`), clear DONE. Convert the disparity image
   to a depth map, for example as a grey value proportional to disparity. Write
   it to a second frame buffer and set FB_ADDR.
4. The panel shows the depth map from the next frame on.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `SL` scan line length | 240 | paper |
| `WW`, `WH` window | 9, 9 | paper (also evaluated: 5x5, 7x7) |
| `MAXD` maximum disparity | 31 | paper |
| pixel width | 8 | assumed |
| LCD 320x240, `PIX_DIV` 4, porches 8/8/16 and 2/2/4 | | assumed |
| LCD FIFO 512 x 32 | 16,384 bits | paper's memory size |
| keypad 4x4, `SCAN_DIV` 256 | | assumed |

The shared constants and the AHB bundle types (`ahb_m2s_t`, `ahb_s2m_t`,
`htrans_e`, `hresp_e`) are in `sad_pkg`.

**What the defaults can process.**
- The default build matches 9x9 windows over 32 disparities on images 240
  pixels wide, with any number of rows.
- Wider images need `SL` set to the width. For example, `SL = 320` handles
  320x240 images such as the standard Tsukuba pair.
- Each `SL = 320` frame takes about 480,000 clocks at the measured 6.25
  clocks/pixel. The paper reports about 123 frames/s for 320x240 images, which
  would need a bus clock of about 59 MHz. The paper gives no clock frequency, so
  that rate is not verified here.

## Departures and open points

- The image pairing, one fixed left window against moving right windows,
  follows the paper's hardware description rather than its formula. See above.
- The paper states the correlator's speed as O(log wh + ww + Δ). This design is
  fully parallel across disparities and pipelined: one pixel per clock, 4 clocks
  of latency. The O() expression does not say what the paper's own schedule was.
- The paper reports 22,344 memory bits for its correlator. The shift registers
  here hold 30,984 bits. The paper does not explain how its storage was split.
- Outside the scope of this RTL:
  - the processor, memory controllers, bridge and UART: platform or vendor IP,
    represented here by bus ports;
  - the camera interface: drawn in the paper as a future addition;
  - depth computation: software.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_sad_psr` | every tap equals the pixel `r*SL(+d)` back; holds across gaps; clear |
| `tb_sad_dc` | window SADs against direct sums, 3-clock latency |
| `tb_sad_mc` | minimum and lowest-index tie-break, including all-equal and maximum values |
| `tb_sad_correlator` | two frames against a reference model of `C(n,d)`; exact 4-clock latency; random input gaps; clear between frames |
| `tb_sad_wrapper` | register read-back; DMA over a memory with random wait states; interrupt and polled completion; all disparities against the reference |
| `tb_ahb_bus` | three masters with random reads and writes to two wait-stating slaves, checked against shadow copies; one-hot grant and priority; unmapped reads |
| `tb_keypad_ctrl` | key matrix model with bounce: one interrupt per stroke, correct code, no auto-repeat, short contacts ignored |
| `tb_tft_lcd_ctrl` | three frames on a small panel with an 8-word FIFO: every pixel, sync counts, frame interrupt, new buffer contents per frame, no underrun |
| `tb_irq_priority` | all 16 request patterns |
| `tb_stereo_periph_top` | whole flow at reduced size (SL 32, 5x5, disparities 0..15, 32x8 panel) |
| `tb_stereo_full` | whole flow with every parameter at its default: 240x240 pair, 320x240 panel |
| `tb_workload_320x240` | whole flow on a 320x240 pair (`SL = 320`); reports clocks per frame |

The three system testbenches share `stereo_soc_env`, which models everything
outside the peripheral module:
- the memory, with random wait states;
- a bus-functional processor;
- the key matrix;
- a panel monitor.

The environment counts each mechanism and fails if one never happens: memory
stalls, bus contention, a debounced key stroke, the SAD interrupt winning over a
pending UART interrupt, LCD frames and the frame interrupt. The reference
disparities come from `sad_ref_pkg::ref_disparity`, a direct evaluation of
`C(n,d)`.

Test images are generated: a random texture in which each horizontal band of
rows is shifted by a different disparity, plus noise in the correlator unit
test. All 57,600 disparities of the full-size run match the reference. The run
takes under 10 s of wall-clock time in Verilator.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/sad_pkg.sv tb/sad_ref_pkg.sv tb/tb_stereo_full.sv -y rtl -y tb \
  --top-module tb_stereo_full -o sim
obj_dir/sim
```

Replace `tb_stereo_full` with any testbench name. The unit testbenches do not
need `tb/sad_ref_pkg.sv` on the command line, except `tb_sad_wrapper`.
`tb/ahb_mem_model.sv` is a behavioural model, not RTL.
