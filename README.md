# Real-time moving object detection with an enhanced single-Gaussian background model

This is synthesizable SystemVerilog for a video system that separates moving objects from a static background in
1280×720 camera video at 30 frames/s. Every pixel has its own statistical model, a running mean μ and a standard
deviation σ. A new pixel that lies too far from its mean is foreground (white), and anything else is background
(black). The per-pixel models of a whole frame do not fit on chip. They live in external frame memory, so each
frame the mean/sigma frame is streamed in, updated and streamed back out next to the camera frame.

The system has three pipelines that only meet in the external memory:

```
 camera (CCIR656, 8 bit, 40 MHz)
   │
   ▼
 preproc_pipeline ── RGB + fsync ──► vfbc_writer ──► port 0  (camera frames, two stores)
                                       │fsync
                                       ▼
                    sg_pipeline   ◄── port 3  (camera frame n-1)
                                  ◄── port 4  (mean/sigma, read)
                                  ──► port 2  (mean/sigma, written back in place)
                                  ──► port 1  (classification frame)
 display_pipeline (72.5 MHz) ◄──────── port 5  (classification frame) ──► DVI transmitter
```

`mod_top` wires them together and brings the six memory-controller ports out as arrays. The memory controller and
the DRAM behind it are not part of this RTL.

## The enhanced single-Gaussian model

For a grey-level pixel I and its stored model (μ<sub>t-1</sub>, σ<sub>t-1</sub>) each frame computes:

```
μ_t   = a·μ_{t-1} + (1-a)·I
σ_t²  = a·σ_{t-1}² + (1-a)·(I - μ_t)²
foreground  ⇔  |I - μ_t| > max(Th, K·σ_t)
```

The "enhancement" over the classic single-Gaussian test is the fixed floor `Th`. Where the scene is very still, σ
shrinks towards zero and K·σ would call every bit of sensor noise foreground. The floor stops that. The hardware
tests the two bounds separately and calls a pixel background if it is inside either one, which is the same as the
max() form. A difference exactly equal to the bound counts as background.

Only σ, not σ², is stored. Storing the square root keeps more precision in 16 bits.

### Number formats and constants

| quantity | format | default | note |
|---|---|---|---|
| grey level I | 8.8 unsigned | – | from RGB, weights 0.2126 / 0.7152 / 0.0722 as Q0.16 (13933 / 46871 / 4732) |
| μ, σ | 8.8 unsigned each | – | memory word = {μ[31:16], σ[15:0]} |
| σ² | 16.16 unsigned | – | saturates at 2³²-1 |
| a, 1-a | Q0.16 | 65472, 64 | a = 1 - 2⁻¹⁰ |
| K | Q8.8 | 589 (2.3) | parameter `K_Q8` |
| Th | 8.8 | 768 (3.0) | parameter `TH_Q8` |
| classification word | 32 bit | all ones = foreground, 0 = background | |

Two sets of grey weights exist for this design. The implemented block uses 0.2126/0.7152/0.0722 (the HDTV weights),
and the algorithm description uses 0.2989/0.5870/0.1140. The defaults follow the implemented block, and the other
set is one parameter change away (`rgb2gray` CR/CG/CB). The green weight is rounded so that the three weights sum to
exactly 1.0, so white maps to 255.0.

The hardware's K is not given with the datapath. K = 2.3 is taken from the tuned constants for the "time of day"
test scene, whose threshold is closest to the hardware's Th = 3. The tuned software constants for the three test
scenes (a = 0.993/0.99/0.994, K = 2.3/0.6/1.8, Th = 3.9/19.6/11.6) all fit the parameters. For example, a = 0.993
is `A_Q16 = 65077`, `B_Q16 = 459`.

## The 85-cycle datapath (`sg_logic`)

`sg_logic` takes one RGB pixel and one {μ, σ} word per clock. After exactly 85 clocks it returns the classification
word and the new {μ, σ}. The stage positions follow the original block diagram, in which the 72-cycle square root
dominates:

| clock | what is ready |
|---|---|
| 3 | grey level I (`rgb2gray`: three constant multipliers, two adders) |
| 5 | μ_t = a·μ + (1-a)·I |
| 6 | μ_t - I (I delayed 2) |
| 9 | (μ_t - I)² |
| 10 | (1-a)·(μ_t - I)² |
| 11 | σ_t² = a·σ² (σ² computed in parallel, delayed 5) + the above, saturating |
| 83 | σ_t (`pipe_sqrt`, 72 clocks) |
| 84 | \|I - μ_t\| (`abs_diff`, with μ_t delayed 78 and I delayed 80) and K·σ_t |
| 85 | the two compares (`class_cmp`), the OR of the two "inside" bits, the output mux, and {μ_t, σ_t} |

The original uses a vendor CORDIC square-root core with a 72-cycle latency. `pipe_sqrt` replaces it with a
digit-by-digit restoring square root: one result bit per stage, 16 stages, then a delay line up to 72. It returns
the floor of the exact root, and since √(v·2¹⁶) = √v·2⁸, a 16.16 variance gives an 8.8 σ directly.

## Streaming through frame memory

### VFBC ports

Each memory-controller port (a "video frame buffer connector") takes a four-word command packet at the start of a
frame, then moves 32-bit words through a FIFO:

```
word 0  X size of a line in bytes          (H_ACTIVE*4)
word 1  {write flag, start address[30:0]}
word 2  number of lines - 1
word 3  line stride in bytes
```

The source design says only that the packet carries the frame resolution and the transfer direction. The
layout above is the usual one for this kind of port; check it against the controller you connect.

`vfbc_reader` sends a read packet on each VSYNC pulse. It then hands words to its consumer through a
first-word-fall-through read FIFO (`avail` / `req`). `vfbc_writer` sends a write packet on VSYNC, then pushes every
DATA_VALID word into the write FIFO. The video stream cannot be held back, so a word that meets a full write FIFO
(or arrives while the packet is still being sent) is dropped and raises a sticky `overflow` flag. A VSYNC that comes
while a packet is being sent is ignored. Both blocks can rotate over `NUM_FSTORES` buffers spaced `FSTORE_BYTES`
apart, advancing one store per VSYNC.

### Frame stores and the one-frame lag

The video detector's fsync starts both the camera-frame writer and the SG pipeline. If both used one buffer, the SG
pipeline would read pixels that had not been written yet. So the camera writer ping-pongs between two stores, and
the SG pixel reader trails it by one store (`FSTORE_LAG = 1`): while frame n is being written, frame n-1 is
classified. The mean/sigma frame has a single buffer that is read and rewritten in place. The write of pixel k trails
its read by 85 clocks, so nothing is overwritten before it has been read.

Default memory map (byte addresses, 4 MiB each; a 1280×720 frame of 32-bit words needs 3.5 MiB):

| base | contents |
|---|---|
| 0x0000_0000, 0x0040_0000 | camera frames, {8'h00, R, G, B} |
| 0x0080_0000 | {μ, σ} |
| 0x00C0_0000 | classification, read by the display |

### `sg_pipeline`

Two readers (pixels, model) feed `sg_logic`. A pixel is taken only when both read FIFOs have a word (`take`), so the
pixel and its model always stay paired, and a stall on either port stalls both. VSYNC and `take` pass through
85-stage delay lines with reset. These become the VSYNC and DATA_VALID of the two writers, which send their packets
85 clocks after the readers. `busy` is high while any reader or writer is inside a frame. An assertion checks that no
delayed DATA_VALID reaches a writer that is not streaming.

## Camera input chain (`preproc_pipeline`)

All stages run at the camera clock, one pixel per clock, and carry the sync signals (VSYNC, HSYNC, VBLANK, HBLANK,
DATA_VALID) along with the data. The original system built these stages from vendor video cores that are only
named, with one-line functions. Each is built here as the simplest thing that does the stated job:

| stage | latency | what it does |
|---|---|---|
| `ccir656_decoder` | 5 | finds FF 00 00 XY codes. V (bit 5) and H (bit 4) of XY set VBLANK/HBLANK, and DATA_VALID = NOT(VBLANK or HBLANK) |
| `stuck_pixel_corr` | 3 | a pixel more than `thresh` above or below both same-colour neighbours (x±2) becomes the median of the three |
| `bright_contrast` | 2 | clamp(pixel·contrast/128 + brightness) |
| `bayer_interp` | 2 | 2×2 quad of the pixel, its left neighbour and the two above (one line buffer): R and B taken, the two G averaged (RGGB) |
| `color_balance` | 1 | per-channel gain /128, clamped |
| `image_stats` | 1 | per-channel max and min over a frame, latched at the VSYNC rising edge |
| `gamma_lut` | 1 | three 256×8 tables, filled with identity after reset (256 clocks), writable at run time |
| `video_detect` | 1 | measures active pixels per line and lines per frame, and gives the one-clock `fsync` |

The vendor cores' processor register interfaces are replaced by plain configuration ports.

## Display chain (`display_pipeline`)

`video_gen` walks a 1610×750 raster (1280×720 active). At 72.5 MHz that is 60.04 frames/s. It takes one word per
active pixel from a `vfbc_reader` and shows black (and counts an underflow) if none is there. The reader starts on
the generator's `fsync`, which comes at the first blank line, so the read FIFO fills during vertical blanking.
`video_out` registers DE/HSYNC/VSYNC for a TFP410-type DVI transmitter. It also splits each pixel into the two
12-bit halves of the transmitter's dual-edge input: rise = {G[3:0], B}, fall = {R, G[7:4]}. The dual-edge output
flip-flop is a device primitive and is left to the user. The blanking intervals are not known from the source
design. They are the 720p porches with the horizontal back porch shortened from 220 to 180 clocks, to fit the
72.5 MHz clock.

## Interfaces and timing summary

* `mod_top`: `cam_clk`/`cam_rst` (40 MHz, synchronous active-high reset) for ports 0-4 and the camera side;
  `disp_clk`/`disp_rst` (72.5 MHz) for port 5 and the DVI pins. The memory controller crosses between the clocks;
  there is no other clock crossing in the RTL.
* VFBC ports are arrays indexed 0..5: `vfbc_cmd_data/write/full`, `vfbc_wd_data/write/full`,
  `vfbc_rd_data/empty/read`. Read ports drive their write outputs low; write ports leave their read inputs unused.
* Throughput: one pixel per clock everywhere. A 1280×720 frame takes 921,600 + 89 clocks in the SG pipeline. At
  40 MHz and 30 frames/s there are 1,333,333 clocks per frame.
* Memory traffic: four 32-bit streams at 40 MHz in the SG pipeline (0.64 GB/s), plus the camera write at 40 MHz and
  the display read at 72.5 MHz (1.09 GB/s in total).

## Verification

Every block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one compares against values worked out
independently in the testbench, ends with a `TB_RESULT checks=… failures=…` line, and has a watchdog.

* `sg_ref_pkg` is an integer model of the SG arithmetic. `tb_sg_logic` checks thousands of random pixel/model pairs
  bit-exactly and checks the 85-clock latency. It also checks that background, foreground and Th-decided pixels all
  occur.
* `tb_sg_scenes` runs `sg_logic` three times side by side with the tuned constants of the three evaluation
  scenes (a = 0.993/0.99/0.994, K = 2.3/0.6/1.8, Th = 3.9/19.6/11.6, rounded to the formats above). It checks
  them against the same reference with those constants as arguments.
* `vfbc_mem_model` is a behavioural six-port memory controller with a shared word memory. It can starve read FIFOs
  (`STALL_PCT`) and raise write-FIFO full (`FULL_PCT`) at random.
* `tb_sg_pipeline` checks three frames (16×8) with stalls: the classification and model buffers against the
  reference, the ping-pong store order, and the 85-clock latency from pixel take to model write.
* `tb_mod_top` runs the whole system at 16×6: a CCIR656 camera stream of a still Bayer scene with a moving bright
  square, through all three pipelines.
  * It checks each stored camera frame against the interpolation of its raw frame.
  * It checks the classification and model buffers of every frame against the reference, and that the display shows
    whole frames.
  * It counts read stalls, frame-store switches, foreground, background and Th-decided pixels, statistics updates
    and displayed frames, and fails if any of them never happens.
* `tb_mod_top_full` runs `mod_top` with every parameter at its default: two 1280×720 camera frames, the 720p display
  raster, about 3.8 million checks. It finishes in a few minutes.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style -Irtl -Itb \
  rtl/mod_pkg.sv tb/sg_ref_pkg.sv tb/tb_mod_top.sv --top-module tb_mod_top -Mdir obj_tb
./obj_tb/Vtb_mod_top
```

## Departures from the source design, and limits

* The square root is a restoring-digit pipeline padded to the original 72 clocks, not a CORDIC.
* Grey weights follow the implemented block (HDTV weights), not the algorithm text (see above).
* K = 2.3 and a = 1 - 2⁻¹⁰ are chosen values (see above).
* The VFBC packet layout, the two-store ping-pong, the memory map and the overflow/ignore rules of the
  readers/writers are this design's own.
* The camera-side stages are minimal versions of vendor cores. Examples: a one-line, three-tap median; 2×2 Bayer
  interpolation; identity gamma at reset.
* The display blanking is chosen to give 60 frames/s at 72.5 MHz.
* Not included: the multi-port memory controller and DRAM, the camera and its I²C set-up, the DVI transmitter and
  its dual-edge output flip-flops, the clock generator and the processor system.
* The SG testbenches use a deterministic synthetic scene. The design was not run on recorded video.

## Files

`rtl/`: `mod_pkg` (shared constants, VFBC command packing), `rgb2gray`, `abs_diff`, `class_cmp`, `pipe_sqrt`,
`delay_line`, `sg_logic`, `vfbc_reader`, `vfbc_writer`, `sg_pipeline`, `ccir656_decoder`, `stuck_pixel_corr`,
`bright_contrast`, `bayer_interp`, `color_balance`, `image_stats`, `gamma_lut`, `video_detect`, `preproc_pipeline`,
`video_gen`, `video_out`, `display_pipeline`, `mod_top`.

`tb/`: one `tb_<module>.sv` per module, `tb_mod_top_full.sv`, and the support files `sg_ref_pkg.sv` and
`vfbc_mem_model.sv`.
