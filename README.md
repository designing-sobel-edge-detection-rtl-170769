# Sobel edge detector: a streaming, one-pixel-per-clock pipeline

This is a Sobel edge detector for 8-bit grayscale frames, written in
synthesizable SystemVerilog for an FPGA. A frame is loaded into on-chip
memory and scanned in raster order. Two line buffers turn the pixel stream
into a sliding 3x3 window. The Sobel kernels are applied to the window, and
the gradient magnitude is approximated as |Gx| + |Gy|. A threshold then
turns the magnitude into a binary edge map. Each stage is registered, so a
new pixel enters every clock while earlier pixels are still moving through
the later stages.

The kernels are:

    Gx = -1  0 +1        Gy = -1 -2 -1
         -2  0 +2              0  0  0
         -1  0 +1             +1 +2 +1

For every pixel position the design produces two results:
- an 8-bit edge-strength pixel, min(|Gx|+|Gy|, 255), the grey-level edge image;
- an edge bit, 1 when |Gx|+|Gy| > THRESHOLD.

## Pipeline

```
 load port ──► sobel_input ──► sobel_window ──► sobel_conv ──► sobel_threshold ──► sobel_output ──► read port
               frame memory    2 line buffers    Gx, Gy  │ |Gx|+|Gy|   edge bit,        result memory,
               raster scan,    + 3x3 window     (stage 1)│ (stage 2)   8-bit clamp      output_count, done
               pad beats       centre address,                                          result stream
                               border flag
```

| file | role |
|---|---|
| `rtl/sobel_pkg.sv` | pixel, gradient, magnitude, window and result types |
| `rtl/sobel_input.sv` | frame memory, load port, raster-scan source, `pause` |
| `rtl/sobel_window.sv` | line buffers, 3x3 window, centre address and border flag |
| `rtl/sobel_conv.sv` | Sobel gradients (stage 1) and \|Gx\|+\|Gy\| (stage 2) |
| `rtl/sobel_threshold.sv` | edge decision and 8-bit clamp |
| `rtl/sobel_output.sv` | result memory, output counter, `done`, read port |
| `rtl/sobel_top.sv` | the whole detector |

## Line buffers and window alignment

This is the part that takes the most care.

**Line buffers.** `sobel_window` keeps two arrays of W pixels, addressed by
column: `lb1` holds row y-1 and `lb2` holds row y-2. When the pixel of column
x arrives, three things happen in one clock:
1. `lb2[x]` and `lb1[x]` are read. With the new pixel they form one new
   window column (top, middle, bottom).
2. The 3x3 window register shifts one column to the left and takes that
   column on the right.
3. `lb2[x]` takes the old `lb1[x]`, and `lb1[x]` takes the new pixel.

Each pixel is read from the frame memory only once. The line buffers supply
the other two rows.

**Centre alignment.** After the pixel with raster index k has been taken,
the window is centred on index k − W − 1: one row up and one column left.
So the last image row can only be completed by beats that come after the
frame. For this reason `sobel_input` appends **W + 1 pad beats** (value 0,
flagged `pad`) to the W·H frame pixels. A frame is W·H + W + 1 beats long.
The window unit ignores the first W + 1 beats, then emits exactly W·H
windows, one per pixel position. It gives each window the raster address of
its centre.

**Border.** A centre in the first or last row or column has no full 3x3
neighbourhood. Its window wraps into the neighbouring row or into data from
before the frame. `sobel_window` flags these centres with `border`, and
`sobel_conv` forces their gradients to zero. The output image keeps the
input's size, with a ring of zeros (magnitude 0, non-edge) one pixel wide.
OpenCV-style software usually extrapolates the border instead. Compare
software results with this design on interior pixels only.

## Arithmetic

- Pixels are 8-bit unsigned.
- Each kernel row or column is a 1-2-1 weighted sum, done with a shift and
  adders. No multipliers are used.
- Gx and Gy are 11-bit signed. Their range is −1020 to +1020.
- |Gx| + |Gy| is 11-bit unsigned. It cannot exceed 2040.
- The edge decision compares the full 11-bit magnitude. The clamp to 255
  only affects the 8-bit image output.

## Timing

- Throughput is one pixel per clock.
- Latency of each stage, in clocks:

  | stage | clocks |
  |---|---|
  | frame memory read | 1 |
  | window | 1 |
  | gradients | 1 |
  | magnitude | 1 |
  | threshold | 1 |
  | output write | 1 |

- With `pause` low, `done` rises **W·H + W + 6 clocks** after the clock edge
  that samples `start`. At 64 x 64 that is 4166 clocks.
- `pause` holds the source only. No beat is issued while it is high, and
  the stages behind it keep draining. Bubbles in the stream are allowed
  everywhere downstream.
- No clock frequency is set. There is no long combinational path: the
  deepest one is an adder tree of about three 11-bit levels.

## Using the top (`sobel_top`)

| parameter | default | meaning |
|---|---|---|
| `W`, `H` | 64, 64 | frame size (4096 pixels) |
| `THRESHOLD` | 128 | edge bit is `mag > THRESHOLD`, with mag in 0..2040 |

To process a frame:
1. Reset: hold `rst` high for at least one clock. Reset is synchronous and
   active high.
2. Write the W·H pixels in raster order: set `load_we` with `load_addr` and
   `load_data`, one pixel per clock.
3. Pulse `start` for one clock while `busy` is low.
4. Wait for `done`. `output_count` counts the results as they are written.
5. Read the results: set `rd_addr`. `rd_result` is valid one clock later and
   holds `{mag8, edge_bit}`.

While the frame runs, results also stream out in raster order on
`output_valid`, `output_image` and `output_edge`. Other ports are for
observation:
- `data_valid`, `input_image`, `idx_in` and `data_pad`: the input stream;
- `grad_valid`, `grad_x` and `grad_y`: the gradients.

A new frame can be loaded and started once `busy` is low. `done` stays high
until the next `start`.

Resources at the defaults, after coarse synthesis:
- memory, 70,656 bits in all:
  - frame memory: 4096 x 8 bits;
  - result memory: 4096 x 9 bits;
  - line buffers: 2 x 64 x 8 bits;
- 255 flip-flops;
- about 120 word-level cells.

## Where this departs from, or adds to, the original design

The original design description lists these modules:
- an input module that reads pixels from a memory and scans them row by row;
- a line-buffer/window module;
- a convolution module using |Gx|+|Gy|;
- a thresholding module with a binary output;
- an output module that stores the edge image.

It also gives the two kernels and says the architecture is pipelined. All
of that is followed here. It gives no widths, timing, threshold value, border
rule or interfaces, so these are choices of this implementation:

- **Frame size 64 x 64.** The original simulation holds the image in a
  4096-entry, 8-bit array. The square shape is assumed.
- **Threshold.** It is fixed at 128 by a parameter; no value was given. The
  comparison is strict (`>`).
- **Both outputs are kept.** The original shows an 8-bit `output_image`
  signal and grey-level edge images, and also describes a binary threshold
  output. This design therefore produces both.
- **Line storage.** The original calls for three stored lines. Here two
  line buffers hold the previous rows, and the third line is the incoming
  stream itself.
- **Magnitude scaling.** Magnitudes above 255 are clamped, not scaled.
- **Border rule:** a zero ring, as described above.
- **Extra control and ports:** the pad beats, the `pause` input, the load
  and read ports, and the observation ports.
- **Reading files.** The original testbench read pixel values from a text
  file prepared by a script. Here the testbenches generate their images.
  The RTL only sees memory writes.
- **Image size.** A larger image, such as the common 512 x 512 test image,
  needs `W`/`H` set to match. That also sizes the two frame memories, which
  grow to 4.5 Mbit at 512 x 512.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints a
`TB_RESULT checks=N failures=M` line and stops itself with a watchdog if the
design hangs. `tb/sobel_ref_pkg.sv` is the reference model. It computes the
gradients by multiply-accumulate with integer kernel tables, independently
of the adder form the RTL uses.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_sobel_top.sv \
    --top-module tb_sobel_top
./obj_dir/Vtb_sobel_top
```

To run a block's test, replace `tb_sobel_top` with `tb_sobel_input`,
`tb_sobel_window`, `tb_sobel_conv`, `tb_sobel_threshold` or
`tb_sobel_output`, or with `tb_sobel_frames`. `-Itb` lets Verilator find
the helper module that `tb_sobel_frames` uses.

**`tb_sobel_top`** runs the top at its default parameters. It processes two
64 x 64 frames, which takes well under a second. The frames contain:
- a black border band (first frame) or noise up to the edges (second frame);
- a bright rectangle;
- a ramp;
- a checkerboard;
- a white-noise patch.

It checks the gradients, the result stream and the stored image, pixel by
pixel. On the unpaused frame it checks the exact W·H + W + 6 latency. The
second frame runs with random pauses. The test also counts how often each
mechanism occurred and fails if one never did:
- border zeroing;
- edge and non-edge decisions;
- clamping;
- pauses;
- pad beats;
- overlapping pipeline stages;
- back-to-back frames.

**`tb_sobel_frames`** runs two more configurations side by side, through
the helper `tb/sobel_frame_runner.sv`:
- 512 x 512, the size of the usual Lena test image;
- a non-square 96 x 40 frame with THRESHOLD = 300.

Both use a synthetic portrait-like scene and are checked pixel by pixel,
including the latency formula.

**Block tests.** These cover:
- exact stage latencies;
- bubbles;
- comparisons at the threshold and at the clamp point;
- window contents against the frame for every interior centre;
- `done` rising on exactly the W·H-th result.

**Assertions.** The RTL carries three:
- no beat while the source is held;
- no window without an accepted beat;
- the output count never exceeds W·H.

They are checked in simulation with `--assert`.
