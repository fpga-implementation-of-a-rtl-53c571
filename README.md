# Real-time stereo vision system in SystemVerilog

This is a stereo depth-estimation system built around a memory-to-memory
pipeline, following the thesis "FPGA Implementation of a Real Time Stereo Vision
System". The target is a Zynq-7020 board with an ARM processor. Two cameras
deliver 640x480 grey frames with 8-bit pixels. The programmable logic then:

1. rectifies each frame with a precomputed map;
2. computes a disparity image with Semi-Global Matching (SGM) on census costs;
3. shows the disparity image on a VGA monitor.

Every stage reads its input from external DDR memory and writes its result back
to DDR. The processor configures each stage through its own small register file
and starts it.

```
 cameras ──> ov7670_capture x2 ─┐                       ┌── axil_regs x7 <── processor
                                │                       │    (one per peripheral)
 raw L/R ──> remap_peripheral x2 ├──> mem_arbiter ──> DDR port
 rect L/R ─> sgm_peripheral x2  ─┤    (round robin)
 disparity > vga_display        ─┘
```

All of the logic runs on one 100 MHz clock (`clk`) with an active-low
asynchronous reset (`rst_n`).

## Files

| File | Contents |
|---|---|
| `rtl/stereo_pkg.sv` | Frame size, SGM sizes and penalties, memory request struct, AXI4-Lite channel structs, register offsets |
| `rtl/stereo_system_top.sv` | Top level: 2 capture, 2 remap, 2 SGM and 1 VGA peripheral, 7 register files, memory arbiter |
| `rtl/sgm_peripheral.sv` | Reads one horizontal section of the left/right rectified images, runs `sgm_core`, writes the valid disparity rows |
| `rtl/sgm_core.sv` | Streaming census + 4-path SGM for one section, one disparity per clock |
| `rtl/sgm_path_cost.sv` | One path's cost update (the SGM recursion) for one disparity |
| `rtl/line_window.sv` | Line buffers and a WIN x WIN pixel window |
| `rtl/census_transform.sv` | Census vector of a window |
| `rtl/census_cost.sv` | Hamming distance of two census vectors |
| `rtl/remap_peripheral.sv` | Rectification by bilinear interpolation through a map |
| `rtl/vga_display.sv` | 640x480 at 60 Hz VGA output of a frame in memory |
| `rtl/axil_regs.sv` | AXI4-Lite register file with control/status and auto-restart |
| `rtl/mem_arbiter.sv` | Round-robin arbiter onto one memory port, with in-order read-response routing |
| `rtl/ov7670_capture.sv` | OV7670 camera receiver that keeps the luminance bytes |
| `tb/` | One self-checking testbench per module, an end-to-end test, a full-size test, a DDR model, an AXI4-Lite driver and a software SGM reference |

## Interfaces

### Memory port

The system has one memory port, byte-wide. It uses a request/response
handshake rather than the AXI4 master bursts of the original design:

- `mem_req_valid` / `mem_req_ready`: a handshake on the request, which is
  `mem_req = {we, addr[31:0], wdata[7:0]}`.
- `mem_rsp_valid` / `mem_rsp_rdata`: read data. It comes back in request
  order, any number of cycles later.
- Writes get no response.

The original work states that DDR bandwidth is far above what the peripherals
need. In simulation, the memory model adds a 5-cycle read latency and random
back-pressure.

### Register file of each peripheral (AXI4-Lite, 32-bit)

| Offset | Register | Meaning |
|---|---|---|
| 0x00 | control | bit 0 start (write 1); bit 1 done (sticky, cleared by reading); bit 2 idle; bit 7 auto restart |
| 0x04 | source 0 | capture: frame address. remap: raw frame. SGM: left rectified frame. VGA: frame to show |
| 0x08 | source 1 | remap: map address. SGM: right rectified frame |
| 0x0C | destination | remap: rectified frame. SGM: disparity frame |
| 0x10 | argument 0 | SGM: first image row of the section |
| 0x14 | argument 1 | SGM: number of rows read |
| 0x18 | argument 2 | SGM: rows discarded at the top of the section |
| 0x1C | argument 3 | SGM: rows written |

- With auto restart set, a peripheral starts again as soon as it finishes. This
  lets the processor set everything up once and leave the chain running.
- Accesses to an undefined offset answer SLVERR.
- The top brings out the seven register interfaces as an array of structs
  (`s_axil_req[6:0]`, `s_axil_rsp[6:0]`). Index 0 is the left capture, then
  right capture, left remap, right remap, SGM section 0, SGM section 1, and 6 is
  VGA.

### Data formats in memory

- **Frames** are 640x480 bytes in raster order.
- **Maps** have 4 bytes per output pixel, little-endian: a signed 16-bit source
  x, then a signed 16-bit source y. Both are fixed point with 5 fraction bits.
  The map is made offline from the camera calibration.
- **Disparity images** have one byte per pixel, holding the disparity 0..79.

## How the blocks work

### SGM matcher (`sgm_core`, `sgm_peripheral`)

The left image is the reference. For each pixel and each disparity d:

- The matching cost C(p,d) is the Hamming distance between two 11x11 census
  vectors: that of the left pixel, and that of the right pixel d columns to
  its left.
- A census bit is 1 when the window element is larger than the centre.
- Costs are aggregated along four paths: top-left, top, top-right and left.

The update along one path is:

```
L(p,d) = C(p,d) + min( L(p-r,d), L(p-r,d-1)+P1, L(p-r,d+1)+P1, min_i L(p-r,i)+P2 ) - min_i L(p-r,i)
```

- The four path costs are summed, and the sum is limited to 2^SUM_W − 1.
- The disparity is the index of the smallest bounded sum. Ties go to the lower
  disparity.
- Neighbours beyond the top, left or right image edge count as the maximum
  cost, so they never win the minimum.

The core works through one pixel at a time:

- The disparity loop is not unrolled: one disparity per clock, using one shared
  census-cost unit and four path-cost units.
- The three upper-row paths of the previous row are kept for every column and
  disparity in one RAM, `cost_row`: 640 x 80 x 30 bits.
- The left path of the previous pixel is kept in registers, `cost_left`.
- While pixel x is processed, the core also does two things:
  - it reads column x+2 of the previous row from the RAM, which becomes the
    top-right neighbour two pixels later;
  - it writes the finished upper-path costs of pixel x−1 back into the RAM.
- The minimum of each column over all disparities is computed while the column
  is loaded.

Timing and latency of the core:

- It takes D+4 clocks per pixel, plus 2D+1 clocks at the start of each row to
  preload columns 0 and 1.
- The census windows trail the input by R rows and R pixels (R = WIN/2).
- The image is handled as one linear raster, zero-padded. A window that crosses
  a row end therefore takes pixels from the neighbouring row, and the pixels
  left of column 0 come from the end of the previous row.
- The disparity of pixel n is the n-th output of the core. To flush the last
  outputs, the peripheral feeds R x WIDTH + R zero pixels after the section.

Sectioning across the two SGM blocks:

- Each block processes one horizontal half of the frame, which doubles the
  frame rate.
- A block reads its 240 rows plus WIN/2 = 5 rows of overlap into the other half.
- It discards the overlap rows, whose windows are incomplete, and writes only
  its own 240 rows.
- Section 0 reads rows 0–244 and writes rows 0–239. Section 1 reads rows
  235–479, skips 5 rows and writes rows 240–479.

### Rectification (`remap_peripheral`)

For each output pixel, in raster order, the block:

1. reads the 4-byte map entry;
2. reads the up to four source pixels around the mapped position (source pixels
   outside the frame count as 0 and are not read);
3. interpolates bilinearly with 5-bit weights, rounding to nearest;
4. writes the result.

### Display (`vga_display`)

- Standard 640x480 at 60 Hz timing, with a pixel every 4 clocks (25 MHz) and
  active-low syncs.
- Each visible line is fetched from memory one line ahead into one of two line
  buffers.
- The grey level is the stored byte shifted left by 1, so disparities 0..79 map
  to 0..158. The output is 4 bits per colour.
- A sticky `underflow` flag reports a line that was not fetched in time.

### Camera capture (`ov7670_capture`)

- The camera's pixel clock, vsync, href and data are sampled in the 100 MHz
  domain through two-flop synchronisers.
- A falling edge of vsync starts a frame.
- While href is high, every second byte on a rising pixel clock is kept: the
  camera sends Cb, Y, Cr, Y, and only the Y (luminance) bytes are kept.
- Kept bytes go through an 8-entry FIFO into consecutive memory addresses.
- Overflow of the FIFO is flagged.
- `pixels` counts the bytes written since the start.

### Memory arbiter (`mem_arbiter`)

- Grants one request per cycle, round robin.
- Records the master of each read in a FIFO, so each read response goes back to
  the master that asked.
- Assertions check two rules:
  - a master keeps its request stable until it is accepted;
  - no response arrives without an outstanding read.

## Parameters (defaults)

| Parameter | Default | Origin |
|---|---|---|
| Frame | 640 x 480, 8-bit | from the thesis |
| Census window WIN | 11 x 11 (121-bit vector) | from the thesis |
| Search range D | 80 | from the thesis |
| SGM sections | 2 | from the thesis (two SGM blocks) |
| Clock | 100 MHz | from the thesis |
| P1, P2 | 10, 100 | chosen here; the thesis gives no values |
| Path cost width / sum bound | 10 bits / 1023 | chosen here |
| Map fraction bits | 5 | chosen here |
| VGA timing, divider, shift | 640x480@60, 4, 1 | chosen here |

## Performance

All figures below are at the default size, from simulation at 100 MHz.

| Stage | Cycles | Time |
|---|---|---|
| Rectification, both images concurrently (5-cycle memory latency) | 15.78 M | 0.158 s |
| SGM, both sections concurrently | 13.26 M | 0.133 s (about 7.5 frames/s for matching alone) |
| Whole chain, run back to back | 29.0 M | 3.44 frames/s |

- The SGM stage is within 0.4 % of the core's own rate, 245 x (640 x 84 + 161)
  cycles per section.
- The original system reported 4 frames/s with two SGM blocks.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values are
computed independently in the testbench; for SGM that is `tb/sgm_ref_pkg.sv`, a
direct software version of the algorithm.

- `tb_sgm_core` runs a 16x8 image with a 5x5 window and 6 disparities. It checks
  every disparity and every clamp flag, and checks the total cycle count against
  the rate above.
- `tb_stereo_system_top` runs the whole system end to end at 32x16 with a 5x5
  window and 6 disparities:
  1. two camera models stream a junk frame and then the scene, with auto
     restart;
  2. both remaps run and are compared with a bilinear model;
  3. both SGM sections run at the same time and are compared with the
     reference;
  4. one displayed VGA frame is compared pixel by pixel.

  It also counts, and requires, these events: arbiter contention, memory
  back-pressure, auto restart, remap reads outside the frame, discarded overlap
  rows, the sum-cost bound taking effect, and line fetches with no underflow.
- `tb_stereo_system_full` runs the top at its default parameters (640x480, 11x11
  window, 80 disparities, two sections). It rectifies, matches and displays one
  frame pair, and checks all 1.2 million outputs. It takes about 90 seconds in
  Verilator.
- For each module, a copy with one deliberate bug was checked. Its testbench
  reports failures for each of these copies.

## Not built

- **The ARM processor, the DDR memory and the USB cameras.** The processor's
  register accesses, DDR and the camera frames are modelled in the testbenches.
- **AXI4 master bursts and the AXI interconnect.** They are replaced by the
  byte-wide memory port and the arbiter.
- **Alternative matchers.** The thesis compares the final SGM system with a
  plain census matcher in two variants, SAD matching and a median filter. These
  are not part of the final system and were not built.
- **Timing closure, resource use and on-board operation.** None of these was
  measured.
