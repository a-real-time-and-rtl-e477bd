# Block-based defect pre-screening for sheet-material inspection

A hot-rolling mill moves steel strip at up to 18 m/s. A grey line-scan camera
looks at a 2 m wide field at 0.5 mm × 0.5 mm resolution. That gives
4000 pixels per line and 36,000 lines per second, or 144 Mpixel/s at the peak
(1.15 Gbit/s at one byte per pixel). That is too much for a PC to inspect
pixel by pixel in real time.

This RTL is the FPGA image path that takes the first look. The strip is cut
into 32 × 32-pixel blocks. Each block is cleaned of impulse noise and
reduced to a few feature values, and a set of thresholds decides whether it
looks defective. Only the defective blocks, with their raw pixels and a
descriptor, are passed on towards the host PC for the detailed assessment.
Clean surface is thrown away on the FPGA, so the host sees only a small
fraction of the pixel stream.

The design follows the FPGA part of the Virtex-6 (XC6VLX240T) inspection board
described in *A Real-time and Cost-Effective Image Processing System for
Quality Assurance of Sheet Materials*. That description names the blocks and
gives the sizes and the flow: Camera Link acquisition, 32 × 32 blocks in
block RAM, denoising, feature computation, multi-threshold classification,
and keeping only defective blocks. It does not give the algorithms or the
interfaces. Everything in the "this design's choice" column below is
therefore a plausible, simple implementation, not a reproduction.

## Data path

```
 Camera Link        cl_driver          block_subdivider                 dsp_core
 ports A..H  ──►  (strobe qualify, ──►  2 banks × 32 lines   ──┬──►  pre_denoise ─► block_features ─► multi_threshold
 FVAL/LVAL/DVAL    TAPS px/clock)       band → 32×32 blocks    │         (1×3 median)  (mean, range, grad)  (4 rules)
                                                               │                                           │ verdict
                                                               └──►  defect_packer  ◄──────────────────────┘
                                                                     3 block slots ──► packets (valid/ready)
                                                                                        towards DMA / PCIe
 uart_ctrl ×2: camera serial (txd1/rxd1), RS232 debug (txd2/rxd2)
```

Everything runs on the camera pixel clock (80 MHz in the reference set-up).
The top module is `sqa_top`.

| Quantity | Value | Origin |
|---|---|---|
| Line width | 4000 pixels (`LINE_WIDTH`) | 2 m field / 0.5 mm |
| Block | 32 × 32 pixels (`BLK`) | source design |
| Pixel | 8-bit grey | source design |
| Pixel clock | 80 MHz | source design |
| Taps (pixels per clock) | 2 (`TAPS`), 1–8 supported | this design's choice |
| Throughput | `TAPS` × clock = 160 Mpixel/s | ≥ 144 Mpixel/s needed at 18 m/s |
| Band buffer | 2 × 32 × 4000 bytes = 2.05 Mbit block RAM | derived |
| Packer slots | 3 × 1 KB (`NSLOT`) | this design's choice |

At the defaults, 18 m/s needs 144 Mpixel/s and the path takes 160. The normal
speed of 12 m/s needs 96. The data path never stalls the camera. The block
RAM use is about 2.07 Mbit of the roughly 15 Mbit the XC6VLX240T offers.

## The block stream: from lines to blocks

This is the part that turns a line-scan stream into square tiles. It is the
part to understand before changing anything.

**Bands and banks.** `block_subdivider` writes 32 consecutive lines (a
*band*) into one bank of a two-bank block RAM. When the bank is full it is
handed to the read side, and the next band goes into the other bank. The
RAM word is `TAPS` pixels, and a bank is 32 × `LINE_WIDTH/TAPS` words.

**Read order.** The read side sends a band block by block, left to right.
Each block is 32 rows of `BLK/TAPS` words, row by row, at one word per clock
and with no gap inside a block. Reading a band takes exactly
`BLK × LINE_WIDTH / TAPS` clocks (64,000 at the defaults). That is the time
the camera needs to deliver a band at one word per clock. Any line blanking
therefore gives the reader slack, and with at least one clock of blanking
per line no line is ever lost.

Every word carries a tag (`btag_t`) with these fields:

- `first` and `last` mark the block's first and last word.
- `sol` and `eol` mark the start and end of a block row.
- `col` is the block column.
- `band` is the band number, counted from reset.

The word appears one clock after its RAM address.

**Invariant used downstream.** The denoiser and the feature unit rely on the
stream having no gap inside a block. That lets them find a pixel's right
neighbour (the next word) and the pixel above it (one block row earlier, in
a 16-word shift register) without addresses. Assertions in
`block_subdivider` and `pre_denoise` check this.

**Odd lines.**

- A line shorter than `LINE_WIDTH` is discarded: its row is written again by
  the next line.
- A longer line is cut to `LINE_WIDTH`.
- Both cases are counted in `stat_lines_bad`.
- A line that starts while both banks are still full is dropped and counted
  in `stat_lines_dropped`. This is overflow protection. A camera that blanks
  at least one clock per line cannot cause it, but a stream without any
  blanking does (the unit testbench shows this).

## DSP core: denoise, features, thresholds

`dsp_core` chains three units. It accepts a word every clock and gives one
verdict per block, 4 clocks after the block's last word.

1. **`pre_denoise`**: each pixel becomes the median of itself and its left
   and right neighbours in the same block row. At a block's left and right
   edges the edge pixel stands in for the missing neighbour, so blocks are
   independent. Isolated impulses (single hot or dead pixels) disappear.
   Impulses on the first or last column of a block survive. Latency: 2
   clocks.
2. **`block_features`** computes, over the denoised block:
   - `mean  = Σp >> 10` (the sum divided by 1024 pixels)
   - `range = max − min`
   - `grad  = (Σ|p(x,y) − p(x−1,y)| + Σ|p(x,y) − p(x,y−1)|) >> 4`, using
     differences inside the block only, saturated to 16 bits.

   Latency: 1 clock after the last word.
3. **`multi_threshold`**: four rules, OR-ed into the defect flag:

   | bit | rule | catches |
   |---|---|---|
   | 0 `R_DARK` | `mean < mean_lo` | dark areas, slag |
   | 1 `R_BRIGHT` | `mean > mean_hi` | bright areas, scale |
   | 2 `R_RANGE` | `range > range_hi` | spots, local contrast |
   | 3 `R_GRAD` | `grad > grad_hi` | texture, scratches, cracks |

   A feature equal to its threshold does not fire. Latency: 1 clock.

The thresholds (`thresholds_t`) are static inputs of `sqa_top`. On the board
the embedded processor would write them. A workable starting point for a
background near grey level 120 is `mean_lo=70, mean_hi=180, range_hi=70,
grad_hi=2000`, which the testbenches use.

## Keeping the defective blocks: `defect_packer`

While the DSP core works on a block, the packer stores the same raw pixels
in a free slot. When the verdict arrives:

- A clean block's slot is freed.
- A defective block's slot joins the send queue.

A small in-order queue pairs each verdict with the slot of its block.

Queued slots leave as packets on a valid/ready stream:

- A packet is `BLK²/TAPS` beats (512 at the defaults) of `TAPS` pixels, in
  row order.
- `out_first` and `out_last` mark the first and last beat.
- `out_desc` holds the descriptor for the whole packet.
- A beat does not change while `out_ready` is low.
- A slot is freed as soon as its last word is read.
- The next packet follows without an idle clock.

**Why three slots.** One slot is being filled, one is waiting for its verdict
while the next block has already begun, and one is being sent. With only two,
the third of three defective blocks in a row would be dropped even with
`out_ready` held high. With three, an unbroken run of defective blocks passes
at the input rate.

If a block starts and no slot is free (the DMA side stalled for longer than
the slots can absorb), the block is dropped and its verdict ignored. The
dropped block is counted in `stat_blocks_dropped`. The counters always add
up: `sent + clean + dropped` = blocks seen.

Descriptor `desc_t` (68 bits, packed, MSB first):

| bits | field |
|---|---|
| 67:52 | `band`: band number since reset |
| 51:36 | `col`: block column in the band |
| 35:32 | `rules`: rule mask as above |
| 31:24 | `feat.mean` |
| 23:16 | `feat.range` |
| 15:0 | `feat.grad` |

The block's position in the strip is line `band × 32` and pixel `col × 32`.

## Camera Link acquisition: `cl_driver`

The LVDS deserialisers sit outside the FPGA, so this module sees parallel
ports and strobes:

- Ports A–C come from connector 1 (base mode).
- Ports D–H come from connector 2 (medium and full mode).
- FVAL, LVAL and DVAL are taken from connector 1.

A word is kept when all three strobes are high. Tap *k* comes from the
*k*-th port (A is the leftmost pixel). `TAPS` = 1–3 means base mode, 4–6
medium, and 7–8 full. End of line is only known when LVAL falls, so each
word is held until the next word or the fall of LVAL arrives. The latency
is 2 clocks, or up to the fall of LVAL for the last word of a line.

## UART controllers

There are two `uart_ctrl` instances:

- Controller 1 (`txd1`/`rxd1`, 9600 baud) configures the camera over the
  Camera Link serial pair.
- Controller 2 (`txd2`/`rxd2`, 115200 baud) serves the RS232 debug port.

Both use 8N1 frames, LSB first, with `DIV = CLK_HZ/BAUD` clocks per bit. The
receiver synchronises `rxd`, checks the start bit half a bit after the
falling edge, samples in the middle of each bit, and flags a 0 stop bit in
`rx_frame_err`. A start bit that is gone by mid-bit is ignored. The byte
interfaces (`u1_*`, `u2_*`) are where the processor would connect.

## What is not in this RTL

The board around this logic is built from vendor cores and external parts.
None of them is modelled here; their attachment points are ports of
`sqa_top`.

| Part | Role on the board | Attachment point here |
|---|---|---|
| MicroBlaze soft processor, PLB bus | configuration, driver glue | `thr`, UART byte ports, status counters |
| DMA engine, PCIe x8 Gen2 bridge | moving blocks to host RAM | packet stream `out_*` |
| MPMC and four 128 MB DDR3 chips | buffering | behind the DMA |
| Gigabit Ethernet MAC, MDIO controller, 88E1111 PHY | second camera interface | not connected |
| LVDS-CMOS receivers (DS90CR288A, DS90LV047, DS90LV019) | Camera Link physical layer | `cl_port_*`, strobes |
| Power system and power-on reset generator | supplies, reset | `rst_n` (active low, asynchronous) |

A host-side bandwidth check, if every block were defective: the packet
stream would carry 16 bit × 80 MHz = 1.28 Gbit/s. That is below the
≈1.79 Gbit/s the PCIe link of the reference board achieved towards the host.

## What follows the source and what is this design's choice

| Aspect | Source | This design |
|---|---|---|
| 32 × 32 blocks held in block RAM | ✓ | two banks, block-by-block read order |
| Denoise before features | ✓ | 1 × 3 row median with replicated edges |
| Features per block | named only | mean, range, gradient energy |
| Multi-threshold classification | ✓ | four rules, OR-ed |
| Keep defective blocks, send to host | ✓ | 3 slots, packet stream, descriptor |
| Camera Link base / medium / full on two connectors | ✓ | tap order, strobes from connector 1 |
| 80 MHz pixel clock, 4000-pixel line | ✓ | single clock domain, 2 taps |
| UART controllers for camera and debug | named only | 8N1, mid-bit sampling, baud rates |
| Line-length errors, overflow handling | not described | discard/cut, drop and count |

## Verification

Each module has a self-checking testbench in `tb/`. Expected values come
from `tb/sqa_ref_pkg.sv`, a reference model that works on whole blocks as
2-D arrays (median, features, rules written out directly), not on the
stream.

| Testbench | Covers |
|---|---|
| `tb_cl_driver` | 2-tap and 8-tap instances, DVAL gaps, lines outside FVAL, latency, line count |
| `tb_block_subdivider` | every pixel and tag of 3 bands at 128-pixel lines; short and long lines; each band read in one unbroken 2048-clock run; overflow with zero blanking |
| `tb_pre_denoise` | against the 2-D median; latency 2 |
| `tb_block_features` | flat, ramp, checkerboard, random and scratch blocks; latency 1 |
| `tb_multi_threshold` | random and boundary cases; each rule fires |
| `tb_dsp_core` | whole chain; latency 4; each rule; a block that only the median makes clean |
| `tb_defect_packer` | packet contents and order under random stalls; six defective blocks in a row at full rate; drops under a long stall; stall stability |
| `tb_uart_ctrl` | TX frames sampled mid-bit; RX good frames, glitch, frame error; loopback |
| `tb_sqa_top` | end to end at 128-pixel lines (see below) |
| `tb_sqa_top_full_mode` | the same with 8 taps (full mode) |
| `tb_sqa_full` | default parameters, no overrides: two full 4000-pixel bands (250 blocks) at one clock of blanking; every defective block checked; band read-out time; one byte per UART |

`tb_sqa_top` uses three phases:

1. Normal traffic with a short line and random output stalls. Every
   defective block must arrive.
2. A long DMA stall, during which the packer must drop blocks.
3. Lines at one clock of blanking, where no line may be lost.

It counts each mechanism and fails if one never happened:

- each of the four rules
- clean-block discard
- median clean-up
- output stall
- packer overflow
- bad line
- band hand-over
- both UART loopbacks

The line-buffer overflow cannot be reached through `cl_driver`, because
LVAL has to fall between lines. It is exercised in `tb_block_subdivider`.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sqa_pkg.sv tb/sqa_ref_pkg.sv tb/tb_sqa_full.sv --top-module tb_sqa_full
./obj_dir/Vtb_sqa_full
```

The full-size test sends each line in 2001 clocks (2000 words and one clock
of blanking). At 80 MHz that is about 40,000 lines/s. The 18 m/s peak needs
36,000 lines/s (2222 clocks per line), and 12 m/s needs 24,000 lines/s. The
test therefore runs the path faster than either speed requires. The
end-to-end test also passes with `TAPS` set to 1 or 4 (a one-line change of
its `localparam`).

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog that counts a failure if it hangs. The full-size test runs in
about 15 s.

Not verified:

- timing closure at 80 MHz on the target FPGA
- behaviour with real camera data
- the choice of features and thresholds, which decides the detection
  quality and would need tuning on real defect images

## Changing the parameters

`sqa_top` parameters: `LINE_WIDTH`, `TAPS`, `BLK`, `CLK_HZ`, `CAM_BAUD`,
`DBG_BAUD`. `defect_packer` also has `NSLOT`. Constraints:

- `LINE_WIDTH` is a multiple of `BLK`.
- `BLK` is a multiple of `TAPS`.
- `BLK²` is a power of two (the mean is a shift).
- `TAPS` is 1–8.
- `CLK_HZ/BAUD` is at least 4.

The reference model in `tb/` handles blocks up to 32 × 32. The band buffer
grows as `2 × BLK × LINE_WIDTH` bytes.

## Files

`rtl/sqa_pkg.sv` holds the shared types (`pix_t`, `btag_t`, `features_t`,
`thresholds_t`, `desc_t`). Each other module has its own file:

- `sqa_top`
- `cl_driver`
- `block_subdivider` (with the RAM helper `sdp_ram`)
- `dsp_core` (`pre_denoise`, `block_features`, `multi_threshold`)
- `defect_packer`
- `uart_ctrl`
