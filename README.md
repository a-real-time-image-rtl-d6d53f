# Nagamod: edge-preserving video smoothing with one FPGA and one SRAM bank

This design smooths an uncompressed grey-level video stream in real time, one
pixel per pixel clock. It is meant as a pre-processing stage ahead of edge
extraction in visual inspection. It uses a simplified form of the Nagao
edge-preserving filter, called Nagamod here.

For every pixel, the filter looks at the 5×5 neighbourhood around it. Inside
that neighbourhood it considers nine 3×3 sub-neighbourhoods, one centred on
each of the nine innermost pixels. The filter picks the sub-neighbourhood whose
intensities are most uniform and outputs that sub-neighbourhood's sum. Nagao's
original filter measures uniformity with the variance. Nagamod uses the
**extent** instead: the maximum minus the minimum intensity. It also keeps the
**sum** rather than the mean. These two changes leave only comparators, adders
and one subtractor, so no multipliers or dividers are needed. A window that
straddles an edge has a large extent and is therefore avoided, so edges are not
blurred, while noise inside flat regions is averaged away.

```
  nine 3x3 centres inside the 5x5 window

      .  .  .  .  .
      .  A  E  B  .        A E B : windows one line up
      .  H  I  F  .        H I F : windows on the centre line
      .  D  G  C  .        D G C : windows one line down
      .  .  .  .  .
```

The output is the 12-bit sum of the chosen 3×3 window. Dividing it by nine
gives the smoothed 8-bit value of the centre pixel. That division is left to
whatever consumes the stream.

## Streaming the 5×5 window: one B1 per line triple, two B2 in cascade

Pixels arrive in raster order. Two horizontally adjacent pixels are one pixel
period apart (z⁻¹), and two vertically adjacent pixels are one line apart
(z⁻ᴺ, where N is the line length). The filter receives one image column of the
5×5 window per cycle: the current pixel plus the pixels at the same column in
the four previous lines. It is built from only two kinds of operator:

* **B1** (`nagamod_b1`) takes three vertically adjacent pixels. It forms their
  minimum, maximum and sum (9-bit, then 10-bit adder). Two z⁻¹ registers keep
  these three values for the previous two columns. A second level then takes
  the minimum, maximum and sum over the three columns (11-bit, then 12-bit
  adder). B1 outputs the extent and the sum of the 3×3 window whose right-hand
  column is the current one. It holds 52 flip-flops: two delays each of the
  8-bit minimum, the 8-bit maximum and the 10-bit sum.
* **B2** (`nagamod_b2`) takes three (extent, sum) pairs. A three-input minimum
  on the extents drives a 3-to-1 multiplexer on the sums. It is purely
  combinational.

`nagamod_filter` connects them in a tree:

```
 line y-4 ─┐
 line y-3 ─┼─ B1 (lines y-4..y-2) ─┐
 line y-2 ─┼─ B1 (lines y-3..y-1) ─┼─ B2 ─┬────────────── B2 ─► register ─► result
 line y-1 ─┼─ B1 (lines y-2..y)   ─┘      ├─ z⁻¹ ───────┤
 line y   ─┘                              └─ z⁻¹ ─ z⁻¹ ─┘
```

* The three B1s give the three vertically stacked windows at the current
  column: upper (A E B), middle (H I F) and lower (D G C).
* The first B2 keeps the best of the three.
* Two z⁻¹ registers hold that best choice for the two previous columns.
* The second B2 chooses among the three columns.

The result is the best of all nine windows, using three B1s, two B2s and four
column registers.

**Ties.** When several windows share the smallest extent, the upper window wins
first, and then the right-most column. This rule is this design's own.

**Alignment.** After the cycle that presented column x of line y, the filter
output holds the result for the 5×5 window covering lines y-4..y and columns
x-4..x. Its centre is the pixel at (y-2, x-2).

## The line delays live in external SRAM, four lines to a word

The four z⁻ᴺ line delays are not built from FPGA resources. They sit in one
external 512K × 32 asynchronous SRAM bank. Word *c* of the bank holds column
*c* of the four previous lines:

| byte | 0 | 1 | 2 | 3 |
|------|---|---|---|---|
| line | y-4 (oldest) | y-3 | y-2 | y-1 |

Each active pixel at column *c* goes through two steps:

1. **Read cycle.** Word *c* is read and captured in a register. The captured
   word, together with the incoming pixel, gives the filter its five-pixel
   column.
2. **Write cycle.** Word *c* is written back shifted down by one byte, with the
   new pixel in byte 3.

These two steps move all four chained line FIFOs forward by one position with a
single word access. The SRAM address is simply the column number, so the bank
uses LINE_W words: 512 words, which is 16 Kbit of pixel data.

This read-then-write access sets the clocking. The design clock `clk` runs at
**twice the pixel rate**: 20 MHz for a 10 MHz pixel clock. The first cycle of
each pixel period reads and the second writes. Inputs are sampled on the clock
edge that ends a pixel period, which is when `pix_clk_o` is high at the edge.

The two-stage pipeline is:

* **Stage 1:** the register that captures the SRAM word.
* **Stage 2:** the filter's output register, which sits after the B1/B2 logic.

A result therefore leaves two pixel periods after the last pixel of its window
entered.

The SRAM is only accessed for active pixels. During line and frame blanking,
chip enable stays high and the filter registers hold their values.

| module | role |
|---|---|
| `cmc_ctrl` | Two-phase sequencer that produces the SRAM strobes (`ce_n`, `oe_n`, `we_n`, all active low) and the read/step pulses. An assertion checks that output enable and write enable are never low together. |
| `cmc_datapath` | Column counter (the SRAM address), the captured word, the shifted write-back word and the five-pixel column. An assertion flags a line longer than LINE_W. |

## Video timing in and out

`io_interface` works with the signals of the video synchronisation board.

**Inputs:**

| signal | meaning |
|---|---|
| `pixel_in` | 8-bit pixel |
| `blank` | high while the pixels belong to a line |
| `synh` | negative pulse between lines |
| `synv` | low between images |

The interface samples these inputs once per pixel period. The sampled `blank`
(`act`) gates the memory and the filter. The interface also counts lines from
the start of the image: the count is cleared while SYNV is low and advances
when Blank falls.

**Outputs:**

* `pixel_out` is held for a whole pixel period.
* `blank_o`, `synh_o` and `synv_o` are the input timing signals delayed by the
  same two pixel periods, so the board can redisplay the stream unchanged.
* `border_o` marks results whose 5×5 window is not entirely inside the image:
  the first four lines, and the first four pixels of every line. These results
  are still produced, but they mix pixels from the previous line or image. Use
  `border_o` to replace them if needed.

Because of the window alignment, the displayed image is shifted by two lines
and two pixels relative to the timing signals.

## Top level: `nagamod_top`

| parameter | default | meaning |
|---|---|---|
| `LINE_W` | 512 | Maximum pixels per line. This is also the number of SRAM words used. |
| `LINES` | 512 | Lines per image. Used only by the line counter (border flag). |
| `ADDR_W` | 19 | SRAM address width (512K words). |

**Ports:**

| group | ports |
|---|---|
| clock and reset | `clk` (2 × pixel rate), `rst_n` (asynchronous, active low) |
| video in | `pixel_in[7:0]`, `blank`, `synh`, `synv`, plus `pix_clk_o` (recovered pixel clock) |
| video out | `pixel_out[11:0]`, `border_o`, `blank_o`, `synh_o`, `synv_o` |
| SRAM | `sram_addr[ADDR_W-1:0]`, `sram_wdata[31:0]`, `sram_rdata[31:0]`, `sram_ce_n`, `sram_oe_n`, `sram_we_n` |

The SRAM data bus is split into separate read and write buses. A board with a
bidirectional bus needs a tri-state buffer enabled by `!sram_we_n`. The upper
address bits stay zero.

**Supported sizes and rates:**

* **512×512 at 25 images/s:** one pixel per 100 ns at 10 MHz, so the active
  pixels take 26.2 ms of each 40 ms frame. The remaining 13.8 ms is line and
  frame blanking, during which the design is idle.
* **720×576 (TV):** set `LINE_W=720`; needs a pixel rate of at least
  10.3 MHz.
* **1024×1024 at 40 MHz:** fits in the bank with `LINE_W=1024`. However, it
  would need two SRAM accesses per 25 ns, which a 17 ns SRAM cannot provide.

## How far to trust it, and where it is this design's own

**What follows the source description:**

* The filter algorithm, with its nine windows, extent and sum.
* The B1/B2 structure and adder widths.
* The solution with three B1s and two B2s.
* Four line FIFOs in one external SRAM bank, with one read and one write per
  pixel.
* No memory activity during blanking.
* A two-stage pipeline.
* The 20 MHz memory clock against the 10 MHz pixel clock.
* The 12-bit sum as output.
* Image size 512×512.

**What this design chose:**

* The order of the read and write cycles, and packing the four FIFO bytes into
  one word.
* The byte order within that word.
* The tie rule.
* Reset values.
* The border flag and the line counter.
* The two-period output delay.
* Split SRAM data buses.

**What is not included:**

* The source also mentions a bank-grant signal from the prototyping board. Its
  protocol is not described, so it is not implemented.
* The PCI bridge, the board clocking, the camera and the synchronisation board
  are outside the RTL.

**Size.** Flip-flop counts differ from the reference implementation except in
B1. Here B1 has 52 flip-flops and B2 has none, matching the reference. The
sequencer and data path are partitioned differently: 1 and 41 flip-flops here,
against 54 and 77 reported for the reference's memory controller and data path.

**Verification.** Every block has a self-checking testbench that compares the
block against an independent model. The filter and top-level models evaluate
all nine windows directly on the frame. Every result in the tests matches:

* small frames;
* two full 512×512 frames at default parameters;
* a 256×256 frame;
* a 720×576 frame.

Timing closure on a real FPGA has not been checked.

**PSNR.** The workload test reports the PSNR between the original and the
smoothed frame, using 10·log10(255²/MSE) with MSE the mean squared difference.
On its synthetic noisy inspection image this is about 19 dB. The value depends
entirely on the image.

## Files and simulation

`rtl/`:

| file | contents |
|---|---|
| `nagamod_pkg.sv` | Types (`pixel_t`, `sum_t`, `ext_sum_t`, `col5_t`), widths, `min3`/`max3` |
| `nagamod_b1.sv`, `nagamod_b2.sv` | The two operators |
| `nagamod_filter.sv` | The operator tree |
| `cmc_ctrl.sv`, `cmc_datapath.sv` | SRAM sequencing and line-buffer data path |
| `io_interface.sv` | Video timing |
| `nagamod_top.sv` | Top level |

`tb/`:

| file | contents |
|---|---|
| `tb_<module>.sv` | One testbench per module |
| `tb_nagamod_top.sv` | End to end: three 24×16 frames covering noise, blocks and near-flat content |
| `tb_nagamod_top_full.sv` | Two 512×512 frames, default parameters, with broadcast-like blanking: 400 000 pixel periods per frame, about 34 % of them blanked. Checks that the frame period is 40 ms at 10 MHz (25 images/s). |
| `tb_nagamod_workloads.sv` | 256×256 and 720×576 frames, PSNR report |
| `nagamod_env.sv` | Source/checker environment used by the workload test |
| `sram_model.sv` | Behavioural model of the SRAM bank |

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog.
To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_nagamod_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/nagamod_pkg.sv tb/tb_nagamod_top.sv -o sim
./obj_dir/sim
```

The full-size and workload tests each run in a few seconds.
