# Skin-colour face detection on live video

This is a real-time face detector for an FPGA board with a 5-megapixel camera, an SDRAM chip and a VGA
output. It finds faces by colour alone. Every pixel goes from RGB to YCbCr. A pixel counts as skin when
its two chrominance values fall inside a fixed box:

    77 < Cb < 127   and   133 < Cr < 177

The luma is ignored, so brightness changes matter less than they would for an RGB test.

The raw skin mask is noisy, so three steps clean it up:

1. **Spatial filter.** A pixel stays skin only when at least 78 of the 81 pixels in its 9×9 neighbourhood
   are skin. This removes specks and thin edges.
2. **Centroids.** Each face is located at the mean X and mean Y of its surviving skin pixels. Up to two
   faces are found, one in the left half of the frame and one in the right.
3. **Temporal filter.** A face is reported only when it appears in two frames in a row.

The live picture is shown on the VGA monitor with a small square drawn on each face.

A separate Sobel edge detector, from an earlier edge-detection experiment, is also included. It sits
beside the face detector in the top level and has its own ports.

Everything is written in synthesizable SystemVerilog, except the parts that are physically outside the
FPGA: the camera, the SDRAM chip, the VGA DAC and the clock PLL. Those have behavioural models under
`tb/` where a testbench needs them.

## Data path

```
camera  --DATA/FVAL/LVAL-->  ccd_capture --> raw2rgb --(2 x 16-bit)--> sdram_control (write ports 1, 2)
        <--I2C-- i2c_ccd_config <- i2c_controller                          |  SDRAM
                                                                           v
VGA  <-- face_marker <--------------------------- read ports 1, 2 <-- vga_ctrl (pixel request, x, y)
              ^                                        |
              |                                        v
          faces  <-- post_processing <-- skin_seg <-- rgb2ycbcr
                     (spatial_filter -> centroid_calc -> temporal_filter)
```

The stages are:

- **Camera configuration.** At power-up, `i2c_ccd_config` writes 25 sensor registers over I2C. These
  set mirroring, exposure, gains, the sensor's PLL, and the readout window. The window is 2× binned, so
  the camera delivers 1280×960 Bayer pixels per frame.
- **Capture and demosaicing.** `ccd_capture` counts columns and rows. `raw2rgb` turns each 2×2 Bayer
  quad into one RGB pixel of 640×480. Green is the mean of the quad's two greens.
- **Frame buffer.** The RGB frame goes into SDRAM through two 16-bit write ports. The display side reads
  it back through two read ports in step with the VGA raster.
- **Detection and display.** Colour conversion and skin detection happen after the frame buffer, on the
  pixels being displayed. As a result:
  - the buffer keeps full 10-bit colour;
  - the pixel coordinates that detection needs come straight from the VGA counters.

### Clock domains

| Clock | Used by |
|---|---|
| `i_clk` | reset sequencing, camera configuration |
| `i_ccd_pclk` | capture, demosaicing, write ports |
| `i_sdram_clk` | SDRAM controller |
| `i_vga_clk` | read ports, detection chain, display |
| `i_sobel_clk` | edge detector |

All clocks are top-level inputs; on the board they come from a PLL. The only crossings between domains
are:

- the four frame-buffer FIFOs;
- the two-flop synchronisers of the port reload signals.

## The frame buffer (`sdram_control`, `async_fifo`)

This is the part that decides whether the system works at speed, so here it is in detail.

### Ports and storage layout

There are four ports, each 16 bits wide with its own clock:

| Port | Index | Contents | Word addresses |
|---|---|---|---|
| write 1 / read 1 | 0 | `{0, G[9:5], B[9:0]}` | 0 … 307,199 |
| write 2 / read 2 | 1 | `{0, G[4:0], R[9:0]}` | `BUF2_BASE` (0x100000) … +307,199 |

A 10-bit RGB pixel needs 30 bits. It is split across the two ports, so both halves of a pixel travel at
the same word address offset.

### Port signals and FIFOs

Each port has its own set of signals: a start address, an end address, a maximum burst length, and a
LOAD input. LOAD sends the port back to its start address and empties its FIFO.

- Every port has a 512×16 dual-clock FIFO (`async_fifo`). It uses Gray-coded pointers and two-flop
  synchronisers, and its read data is registered.
- The fill level seen from the SDRAM side drives scheduling:
  - a write port asks for service once its FIFO holds a whole burst;
  - a read port asks once its FIFO has room for one.

### Scheduling

| Rule | Behaviour |
|---|---|
| Refresh | Always wins. One auto-refresh every `REF_INTERVAL` clocks (750 = 7.5 µs at 100 MHz). |
| Ports | Served round robin. |
| Burst | ACTIVE, then one READ or WRITE per clock on consecutive columns, then wait for the last data, then PRECHARGE. |
| Burst cuts | A burst is shortened at the end of an SDRAM row and at the port's end address, so it never spans two rows. A partial last burst of a frame is written as soon as all its words are in the FIFO. |

The mode register sets burst length 1 and CAS latency 2. Bursts are therefore made of individual column
commands, which keeps the controller independent of the chip's burst modes.

### Reload points

- **Write ports** reload for eight pixel clocks at the rising edge of the camera's FVAL. Words still
  queued from the previous frame go out during the vertical blanking before that edge. Reloading while
  FVAL is low would throw those words away.
- **Read ports** reload during the VGA vertical sync pulse. If a reload overtakes a read burst in
  flight, that burst's remaining data is dropped instead of landing in the freshly cleared FIFO.

### Bandwidth

The SDRAM moves at most one 16-bit word per clock. Assume the clock rates used in the system test:

- SDRAM at 100 MHz;
- camera pixel clock and VGA pixel clock both at 25 MHz.

During a camera line that yields RGB output, each write port receives 12.5 Mwords/s. The read ports
take 25 Mwords/s each while the display is active. That is about 75 Mwords/s against roughly
96 Mwords/s available after row and refresh overhead.

A 50 MHz camera clock would need about 100 Mwords/s. The write FIFOs would then overflow, and
`o_fb_wr_full` shows it. Keep the camera clock at or below about half the SDRAM clock rate, or widen
the bursts.

## From skin mask to face positions (`post_processing`)

### Spatial filter (`spatial_filter`)

The mask arrives in raster order, one bit per clock, so a 9×9 window sum has to be kept without
storing nine full rows of pixels:

- A column memory holds, for each of the 640 columns, that column's last eight mask bits.
- Each incoming pixel reads its column word, adds its own bit to form a 9-bit vertical slice, and counts
  the ones. It writes the shifted word back.
- A shift register keeps the counts of the last nine slices. Their sum is the count for the window
  whose bottom-right corner is the incoming pixel.

The result is given for the window centre, four columns and four rows back. Window centres within four
pixels of the right or bottom edge are not produced. Near the top and left edges the window is clipped,
and anything outside the frame counts as non-skin. Latency is one clock.

### Centroids (`centroid_calc`)

- The frame is split at `SPLIT_X = H_ACT/2`. Each half accumulates ΣX, ΣY and the pixel count of its
  filtered skin pixels.
- At the last pixel of the frame the sums are frozen. Four sequential dividers (`seq_div`, one quotient
  bit per clock) compute the means.
- A half holds a face only if its count reaches `MIN_AREA` (400 by default).
- Results appear 34 clocks after the frame end, well inside the vertical blanking interval. The next
  frame accumulates in parallel.

Only one face per half can be found. Two faces in the same half are merged into one centroid between
them.

### Temporal filter (`temporal_filter`)

- A face is valid only if its half also held a face in the previous frame.
- The reported position is the mean of the two frames' centroids, which also damps jitter.
- The per-frame results are brought out too (`o_frame_faces`), before this filter.

### Markers (`face_marker`)

A 17×17 filled square is drawn at each valid face:

- red for the left face;
- blue for the right face.

The marker uses the temporally filtered positions from the previous frame. It therefore trails a moving
face by one to two frames.

## Display timing and coordinate alignment

`vga_ctrl` runs a 640×480 raster. Each line and each frame starts with the blanking interval, then the
active part:

| Direction | Front porch | Sync | Back porch | Active | Total |
|---|---|---|---|---|---|
| Horizontal | 16 | 96 | 48 | 640 | 800 clocks per line |
| Vertical | 11 | 2 | 31 | 480 | 524 lines per frame |

The vertical total of 524 lines is one short of the usual 525. It follows from the porch values as
given. The frame rate is 59.6 Hz at 25 MHz. Both syncs are active low.

Every unit in the display path adds delay, so the coordinates are delayed to match at each point:

| Signal | Delay after the VGA request (clocks) |
|---|---|
| pixel from the read ports | 1 |
| YCbCr (`rgb2ycbcr`, 3-stage pipeline) | 4 |
| skin bit (`skin_seg`) | 5; the coordinates are delayed by 4 more clocks to arrive with it |
| VGA colour out (`face_marker`) | 2; HS, VS and blank are delayed by 2 as well |

`rgb2ycbcr` works with the conversion matrix scaled by 2^10. The coefficients are:

| Output | R | G | B |
|---|---|---|---|
| Y | 306 | 601 | 117 |
| Cb | −173 | −339 | 512 |
| Cr | 512 | −429 | −83 |

An offset of 128·2^10 is added to Cb and Cr, and the result is rounded and clamped to 0…255. It
takes the top 8 bits of each stored 10-bit colour.

## Camera side

### `i2c_ccd_config`

This block waits `START_WAIT` clocks after reset. It then steps through its 25-entry register table,
sending one I2C write per entry through `i2c_controller`. If a write is not acknowledged, it repeats
that write. The count of repeated writes is brought out on `o_cfg_retries`.

Some table values are this implementation's choices for a 2×-binned 1280×960 readout, and are
parameters:

- exposure;
- readout window (start row and column, row and column size);
- row and column modes.

The camera's I2C address is 0xBA.

### `i2c_controller`

This block performs one transaction per `i_go`. With `i_w_r` = 0 it writes a register:

1. START;
2. four bytes (address, register, data high, data low), each followed by an ACK slot;
3. STOP.

With `i_w_r` = 1 it reads a register:

1. START, then the address with the write bit and the register byte from `i_data[31:16]`;
2. a repeated START, then the address with the read bit;
3. two data bytes from the slave, the first acknowledged by the master and the second not;
4. STOP.

The word read appears on `o_rdata` when `o_end` rises. A write takes 38 bit slots and a read takes 48.
`i2c_ccd_config` uses writes only.

Each SCL period is four phases of `CLK_DIV` clocks, so 250 gives 50 kHz SCL from a 50 MHz clock. SDA is
open drain: `o_sda_oe` pulls the line low, and `i_sda` reads it back.

### `ccd_capture` and `raw2rgb`

- `ccd_capture` qualifies pixels with FVAL and LVAL and counts frames. It only starts at a frame
  boundary. A frame already running when reset ends is skipped, so a partial first frame is never
  counted.
- `raw2rgb` keeps one line of {G1, R} pairs. On each odd row it combines them with the incoming {B, G2}
  pair, producing one RGB pixel per 2×2 quad, one clock later.

## The edge detector (`sobel_filter`)

This is a streaming 3×3 Sobel filter on 8-bit grey pixels:

- Two line buffers, packed as one 16-bit word per column, supply the rows above.
- The two gradients use the kernels (1 2 1 / 0 0 0 / −1 −2 −1) and (−1 0 1 / −2 0 2 / −1 0 1).
- The magnitude √(G1² + G2²) comes from a bit-by-bit integer square root and saturates at 255.
- The output refers to the centre pixel, one column and one row back, two clocks later. The first row
  and column give no output.

## Reset

`reset_delay` releases three resets in turn, after `RST_D0`, `RST_D1` and `RST_D2` clocks of `i_clk`.
The defaults are about 42, 63 and 84 ms at 50 MHz.

| Reset | Released | Drives |
|---|---|---|
| 0 | first | camera configuration |
| 1 | second | frame buffer |
| 2 | last | capture and display |

## Parameters of the top (`face_detect_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `H_*`, `V_*` | 16/96/48/640, 11/2/31/480 | VGA timing |
| `WIN`, `THRESH` | 9, 78 | spatial filter window and threshold |
| `MIN_AREA` | 400 | smallest face, in filtered pixels |
| `BURST` | 256 | maximum SDRAM burst per port |
| `BUF2_BASE` | 0x100000 | word address of the second buffer |
| `INIT_WAIT` | 20000 | SDRAM power-up wait, SDRAM clocks |
| `RST_D0..2` | 0x1FFFFF, 0x2FFFFF, 0x3FFFFF | staged reset delays |
| `I2C_DIV`, `I2C_WAIT` | 250, 50000 | I2C phase length, camera power-up wait |
| `SOBEL_W` | 640 | line length of the edge detector |

The camera raw line length is `2*H_ACT`. The frame holds `H_ACT*V_ACT` words per port.

The top also brings out status signals for monitoring:

- configuration done and retries;
- frame count;
- frame-buffer ready, refresh and burst pulses, FIFO full and empty;
- per-frame and filtered faces;
- the marker flag.

## Verification

Every module has its own self-checking testbench in `tb/`, named `tb_<module>.sv`. Each one compares
the module against values computed independently in the testbench and ends with a line
`TB_RESULT checks=N failures=M`.

The two system tests share `tb/top_harness.svh`. They connect the top to three models:

- a camera model (`ccd_sensor_model`) showing a synthetic scene (`tb_scene_pkg`). The scene has two
  skin-coloured faces of different size, scattered skin-coloured specks and a blue background;
- an SDRAM model (`sdram_model`) that checks command timing;
- an I2C slave (`i2c_slave_model`) that records the register writes and refuses one of them.

The harness checks:

- all 25 register writes arrive, and the refused one is repeated;
- the SDRAM sees no protocol error;
- no read port runs empty while the display requests pixels;
- no camera pixel is lost to a full write port;
- every displayed pixel equals the scene colour, or the marker colour, once a full camera frame is
  stored;
- per frame, the area and centroid of each face match values computed from the scene with the same
  9×9 / 78 rule.

It also counts that each mechanism actually happened:

- refreshes;
- bursts on all four ports;
- port reloads;
- the I2C retry;
- specks removed;
- a face held back by the temporal filter;
- two faces reported together;
- marker pixels drawn;
- edges found by the Sobel filter.

There are two system tests:

| Testbench | Size | Run time |
|---|---|---|
| `tb_face_detect_top` | 64×48 display, short delays | under a second |
| `tb_face_detect_full` | the top at its defaults: 640×480, full reset delays, 1280×960 camera readout | about 200 ms simulated, under a minute in Verilator |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/face_pkg.sv tb/tb_scene_pkg.sv tb/tb_face_detect_top.sv --top-module tb_face_detect_top
./obj_dir/Vtb_face_detect_top +verilator+rand+reset+2
```

Replace the last file and top name for any other testbench. The unit testbenches do not need
`tb_scene_pkg.sv`. Verilator is a two-state simulator, so every register the design reads is reset.

## Choices made here, and known limits

### Values and behaviours chosen in this implementation

These are this implementation's choices, not given by the original design:

- the SDRAM geometry and timing: 4 banks × 8192 rows × 1024 columns, CL 2, tRCD and tRP 2, tRFC 7;
- the buffer layout and reload points;
- the FIFO depth of 512, which matches 32 Kbit of FIFO memory;
- the `MIN_AREA` test;
- the frame split at the centre;
- the two-frame temporal rule;
- marker size and colours;
- the camera address and the assumed readout-window values;
- the I2C retry;
- the reset delays;
- all latencies.

### Limits

- **Two faces at most.** Only two faces can be found, at most one per half of the frame. They are
  assumed to sit side by side.
- **Fixed skin box.** The skin test uses fixed Cb/Cr bounds, so strong coloured lighting defeats it.
  The bounds are parameters of `skin_seg`.
- **No read-back of the camera.** The I2C master can read registers, but the configuration sequence
  does not read any register back to check it.
- **Camera clock limit.** The frame buffer has no back-pressure to the camera. A camera clock faster
  than the SDRAM can absorb loses pixels, which `o_fb_wr_full` shows.
- **Clocks come from outside.** The PLL, the camera's MCLK and the VGA DAC clock are outside this RTL.
  All clocks enter as inputs.
- **No timing analysis.** No timing analysis was done. The post-processing chain has a long adder tree
  in the 9-slice window sum and wide dividers, which may limit the clock rate on a slow device.
