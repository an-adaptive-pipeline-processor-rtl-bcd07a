# Adaptive video pipeline of identical processor elements

This design processes digitised TV video in real time without a frame store.
The video passes through a string of identical processor elements (PEs). Each
PE stores only two lines of the picture, works on the 3x3 neighbourhood of
every pixel and passes one result pixel per clock to the next PE. A control
computer reprograms any PE over a shared serial bus while video runs. One chip
design can therefore be a Gaussian filter, a Sobel edge detector, a line
thinner, a thresholder or simply a delay. The delay through a PE does not
depend on what it is programmed to do, so chains can be cascaded, and they
can also be split and merged again.

The RTL follows a published architecture for such a PE: a two-line window,
two 3x3 multiplier arrays with summers, then a programmable operator, scaler,
thresholder and invertor, with synchronisation carried alongside the video.
That description gives the block structure and what each block does. It does
not give bit widths, the serial protocol, the register map, the pipeline
timing or a thinning algorithm. All of those are choices made here, and they
are listed under "Departures and open points" below.

## Pipeline (`pipeline_top`)

```
            +-> PE 0 -> PE 1 -> PE 2 -> PE 3 --+--------------> pix_out / sync_out
pix_in ---->|          (chain A)               |
sync_in     +-> PE 4 -> PE 5 -> PE 6 -> PE 7 --+-> add & clip -> mix_out / mix_sync
                       (chain B)

wr_* --> ctrl_link_master --(ser_cs, ser_dat)--> all eight PEs, and out as ctl_cs / ctl_dat
```

* **Chain A on its own is the standard pipeline.** Its input comes from the
  video ADC and its output goes to a DAC and monitor, or to a higher-level
  image processor.
* **Chain B and `add_clip` form the overlay arrangement.** For example, chain A
  finds and thins edges while chain B, left in null operation, delays the
  original picture by exactly the same amount. `add_clip` adds the two and
  limits the sum to 255, which draws the edges in white over the picture.
* **Parameters.** `NUM_PE` (default 4) is the number of PEs per chain. Four PEs
  cover the inspection example: filter, Sobel, horizontal thinner, vertical
  thinner. `LINE_LEN` (default 512) is the number of pixels per line.
* **Latency.** `pix_out` lags `pix_in` by `NUM_PE * (LINE_LEN + 8)` clocks.
  That is 2080 clocks, about 4.1 line periods, at the defaults. `mix_out` is
  one clock later.
* **Addresses.** The PEs of chain A have addresses `0..NUM_PE-1`, those of
  chain B `NUM_PE..2*NUM_PE-1`. Address `0xFF` reaches every PE.
* **Reset.** After reset every PE runs the null operation, so the pipeline is a
  pure delay.
* **`cfg_pending`.** One bit per PE, high while a written configuration is
  waiting for the next frame.
* **`ctl_cs` / `ctl_dat`.** The serial control bus is also brought out, so the
  same controller can set up other parts such as the ADC.

## The processor element (`pe`)

```
sync_in --> delay_line (LINE_LEN+1) --> 7 registers -----------------------------> sync_out
pix_in  --> line_window --win[9]--+--> mult_array A --> summer A --+
                                  +--> mult_array B --> summer B --+--> prog_operator
                                                                        --> prog_scaler --> prog_thresholder
                                                                        --> prog_invertor --> pix_out
ser_cs/ser_dat --> pe_ctrl (shadow -> active at frame start) --> masks, op, divisor, threshold, flags
```

| stage | block | function |
|---|---|---|
| window | `line_window` | three rows of three pixel registers joined by two delays of `LINE_LEN-3` pixels (`delay_line`) |
| 1 | `mult_array` x2 | nine unsigned pixels times nine signed 8-bit coefficients |
| 2 | `summer` x2 | sum of the nine products (21-bit signed, cannot overflow) |
| 3 | `prog_operator` | `PASS_A`, `PASS_B`, `A+B`, `A-B`, `MAG = floor(sqrt(A^2+B^2))`, `MIN`, `MAX`, `|A|` |
| 4 | `prog_scaler` | divide by the programmed divisor (0 acts as 1) and limit to 0..255 |
| 5 | `prog_thresholder` | if enabled: `p >= T` gives 255, otherwise 0 |
| 6 | `prog_invertor` | if enabled: `255 - p` |

### Window geometry and timing

This part needs the most care when the design is changed.

* **Window indexing.** The window element `win[k]`, with `k = 3*row + col`,
  has row 0 as the oldest line (the top of the picture) and column 0 as the
  oldest pixel (the left). The centre pixel is `win[4]`.
* **Mask layout.** Coefficients are indexed the same way. A mask is therefore
  written row by row from the top-left pixel, and the result is
  `sum_k mask[k] * win[k]`. This is correlation: the mask is not flipped.
* **Latency.** Counting one pixel per clock, a pixel entering at clock `n` is
  the window centre at clock `n + LINE_LEN + 2`. It leaves the PE at
  `n + LINE_LEN + 8`, after one register each for multiply, sum, operator,
  scaler, thresholder and invertor. The synchronisation takes the same path
  length: a `delay_line` of `LINE_LEN+1`, then seven registers.
* **Line format.** Lines are exactly `LINE_LEN` pixels, one per clock, with no
  gaps. The window is not cut at the ends of lines or frames. The left and
  right border pixels therefore see pixels from the neighbouring line, and
  the first line of a frame sees the last line of the previous one. Crop or
  ignore a one-pixel border (per PE) if this matters.
* **Start-up.** Delay lines output 0 until they have filled once after reset,
  so no false sync pulse ever leaves a PE.

### Programming and the frame-boundary switch (`pe_ctrl`)

* **Bus.** All PEs share `ser_cs` (frame strobe) and `ser_dat`. Both are
  sampled on the system clock.
* **Frame format.** A frame is 24 bits, sent MSB first while `ser_cs` is high:
  `[23:16]` PE address, `[15:8]` register, `[7:0]` data.
* **Accepting a frame.** A PE takes the frame when `ser_cs` falls after
  exactly 24 bits and the address is its own or `0xFF`. Frames of any other
  length are ignored.
* **Transmitter.** `ctrl_link_master` produces these frames from a valid/ready
  write port. It accepts one write every 26 clocks. An assertion checks that a
  request stays stable until it is accepted.

| register | contents |
|---|---|
| `0x00`-`0x08` | mask A coefficient k (signed) |
| `0x10`-`0x18` | mask B coefficient k (signed) |
| `0x20` | operator, `[2:0]` = `op_mode_e` |
| `0x21` | scaler divisor (0 acts as 1) |
| `0x22` | threshold |
| `0x23` | `[0]` thresholder on, `[1]` invertor on, `[2]` hexagonal sampling |

**When writes take effect.** Writes go to shadow registers. The whole shadow
set becomes active when the first pixel of a frame reaches the window centre.
Every pipeline stage keeps using the configuration that was active when its
pixel passed the centre. As a result, a PE never changes its operation in
the middle of a frame, and a programme that takes many writes is applied
complete if all its writes finish before the frame starts.

**Writes during a frame.** In a chain, each PE switches when the frame start
reaches it. If writes are still in progress at that moment, PEs early in the
chain can start a frame with part of the new programme. To change a whole
chain cleanly, finish all writes before the frame starts at the input.

### Hexagonal sampling

The same PE also handles hexagonally sampled video. Set flag bit 2 to select
it. The sampling pattern it expects, and how the masks are handled, are this
design's own convention:

* **Sampling pattern.** Every odd line of the frame is shifted half a pixel to
  the right. Line 0, the line that starts with the frame sync, is even.
* **Even lines.** The neighbours of a pixel on an even line are: left and
  right in its own line, and columns 0 and 1 of the lines above and below.
  A hexagonal mask is therefore programmed as a 3x3 mask whose corner
  coefficients in column 2 of rows 0 and 2 are zero.
* **Odd lines.** The PE counts line parity from the sync. On odd lines it moves
  rows 0 and 2 of both masks one column to the right. One programme therefore
  serves both kinds of line, and nothing has to be rewritten per line.

### Example programmes

Masks below are given row by row from the top-left pixel.

| operation | mask A | mask B | op | divisor | thr / inv |
|---|---|---|---|---|---|
| null (delay) | centre 1 | 0 | `PASS_A` | 1 | off / off |
| averaging | all 1 | 0 | `PASS_A` | 9 | off / off |
| Gaussian filter | 1 2 1 / 2 4 2 / 1 2 1 | 0 | `PASS_A` | 16 | off / off |
| Sobel magnitude | -1 0 1 / -2 0 2 / -1 0 1 | -1 -2 -1 / 0 0 0 / 1 2 1 | `MAG` | s | optional |
| edge map | as Sobel | as Sobel | `MAG` | 1 | T, on / off |
| horizontal thinner | centre 1, left -1 | centre 1, right -1 | `MIN` | 1 | 1, on / off |
| vertical thinner | centre 1, above -1 | centre 1, below -1 | `MIN` | 1 | 1, on / off |
| inversion | centre 1 | 0 | `PASS_A` | 1 | off / on |
| point enhancement | -1 -1 -1 / -1 9 -1 / -1 -1 -1 | 0 | `PASS_A` | 1 | off / off |

**How the thinners work.** A thinner outputs 255 for a pixel that is strictly
brighter than both its neighbours along one direction, and 0 for any other
pixel. This is a ridge test.
Apply it to a grey-level edge magnitude for non-maximum suppression. On an
already binary edge map it keeps only lines that are one pixel wide.

## Arithmetic

* Pixels are 8-bit unsigned and coefficients 8-bit signed. Products are 17 bits
  and sums 21 bits.
* `A^2 + B^2` is formed at 42 bits. The square root is an exact integer floor
  root, computed bit by bit and unrolled into combinational logic inside the
  operator stage. This is the longest combinational path in the design. If a
  target clock is missed, split this stage (and lengthen the sync and
  configuration delays in `pe` to match).
* The scaler sets negative values to 0 before dividing, rounds the quotient
  toward zero, and limits it to 255.

## Departures and open points

* **Latency.** The published figure is "about 8 line periods" for the
  four-PE inspection example. This design takes about 4.1, because each PE
  outputs the window-centre pixel one line plus 8 clocks after it enters.
* **No blanking.** The stream has no blanking: every clock carries a pixel. A
  real video timing with blanking intervals would need either a pixel-enable
  input or blanking pixels counted as part of `LINE_LEN`.
* **Own choices.** The following are this design's own choices: the bit
  widths, the 24-bit serial frame, the register map, the strapped 8-bit PE
  address, the frame-boundary update, the extra operator functions (`PASS_B`,
  `A+B`, `A-B`, `MIN`, `MAX`, `|A|`), the ridge-test thinners and the
  hexagonal-sampling convention.
* **Pin budget.** The 8 address pins take the PE beyond the 28-pin package
  the architecture aims at. A daisy-chained address scheme would avoid them.
* **Not built.** A second video input with an ALU, an output lookup table, a
  5x5 window (four stored lines) and median filtering are mentioned only as
  options or future work, and are not built.
* **External parts.** The video source, ADC, DAC, monitor, high-level
  processor and the adaptive control algorithm are outside this RTL.
  `pipeline_top` exposes the ADC side (`pix_in`, `sync_in`), the DAC side
  (`pix_out`, `sync_out`) and the control computer's write port (`wr_*`).
* **Line length.** `LINE_LEN` is fixed when the design is elaborated. A
  256-pixel image needs `LINE_LEN = 256`.

## Files

* `rtl/pe_pkg.sv`: widths, `sync_t`, `op_mode_e`, `pe_cfg_t`, the register
  map and `null_cfg()`.
* `rtl/`: one module per file: `pipeline_top`, `pe`, `line_window`,
  `delay_line`, `mult_array`, `summer`, `prog_operator`, `prog_scaler`,
  `prog_thresholder`, `prog_invertor`, `pe_ctrl`, `ctrl_link_master` and
  `add_clip`.
* `tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus the
  following:
  * `pe_model_pkg.sv`: an integer reference model of a PE working on whole
    pixel streams.
  * `pipeline_tb_body.svh`: the end-to-end test shared by `tb_pipeline_top`
    (32x24 frames) and `tb_pipeline_full` (512x512 frames, default
    parameters).

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog.

* **Unit testbenches.** These compare each block with values computed
  independently in the testbench. Examples are random operands across the
  full range, every operator function, both scaler limits, all threshold and
  invertor cases, serial frames that are too short or too long, and frames for
  foreign and broadcast addresses.
* **`tb_pe`.** This reprograms one PE over the serial link while video runs:
  null, Gaussian, Sobel, Sobel with threshold and inversion, both thinners, a
  hexagonal-mode Gaussian and random programmes. It compares whole frames with the reference model and
  checks the sync output and the `LINE_LEN + 8` latency.
* **`tb_pipeline_top` and `tb_pipeline_full`.** These load three programmes
  through `wr_*` while video runs:
  1. The inspection chain in chain A, with chain B delaying, so that
     `mix_out` overlays the edges.
  2. An adaptive change: a new threshold, inversion, and two filters in chain
     B, one of them in hexagonal mode.
  3. Broadcast writes that return every PE to the null operation.

  Frames that lie wholly under one programme are compared with the model on
  both outputs. The tests check the latency, and that it is under 8 line
  periods. They also count each mechanism: frame-boundary switches,
  broadcasts, each operator function used, scaler limiting at both ends,
  thresholding, inversion, add & clip saturation, null operation and
  hexagonal mode. A
  mechanism that never occurs counts as a failure.
* **Run time.** The full-size test runs 3.4 million clocks and takes about
  half a minute.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/pe_pkg.sv tb/pe_model_pkg.sv tb/tb_pipeline_top.sv --top-module tb_pipeline_top
./obj_dir/Vtb_pipeline_top
```

Replace the last file and the top module name to run any other testbench. The
unit testbenches for blocks that do not use the model can omit
`tb/pe_model_pkg.sv`.
