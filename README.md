# Streaming image front ends on four ZBT SRAM banks

This RTL is the memory and pixel-processing front end for two video applications. It targets an FPGA board that has independent banks of 512K × 32 ZBT synchronous SRAM, a video decoder and a Virtex-II class device.

- **Gesture recognition: memory side.** A camera frame of 384 × 240 pixels goes through a *Region* stage, which finds skin areas, and then a *Contour* stage. Region is handled pixel by pixel, as the pixels arrive, so the input frame is never stored. Region's two output images are stored off chip for Contour. The central idea is the *swapping-banks* organisation. Four SRAM banks form two pairs. Region writes frame *i+1* into one pair while Contour reads frame *i* from the other, and the pairs exchange roles at each frame boundary. Each side owns whole banks, so neither waits for the other's memory accesses.
- **Motion detection.** Each RGB frame is compared with a background frame:
  1. grey level of both frames;
  2. absolute difference;
  3. threshold;
  4. two passes of grey-level erosion.

  The result is a per-pixel motion image, shown as red over the background, and a per-frame motion decision. It is a pure streaming pipeline that stores two image rows per erosion pass, never a whole frame.
- **Board bring-up example.** A clock divider makes two LEDs light alternately.

The three sit side by side in `imgproc_top` on a single clock. The Region and Contour algorithms themselves are **not** included. Their connections are ports of the top, so a user can attach their own implementations.

```
 video decoder samples (10-bit 4:2:2)                        SRAM bank 0 1 2 3
        │                                                        ▲ ▲ ▲ ▲
  video_acquire ──pixels──► [ Region, external ]                  │ │ │ │
                                  │ two 8-bit images          wb_zbt_ctrl × 4
                        frame_writer × 2 ──Wishbone──┐            ▲ ▲ ▲ ▲
                                                     ├── bank_swap ┘ ┘ ┘ ┘
 [ Contour, external ] ◄── frame_reader × 2 ─Wishbone┘   (pair {0,1} / {2,3})

 current RGB + background RGB ─► grey_level ─► grey_level ─► diff_threshold
      ─► erosion_filter ─► erosion_filter ─► overlay + count ─► motion image, motion flag

 clk ─► led_blinker ─► led[1:0]
```

## Memory organisation: swapping banks

Each Region output image has 384 × 240 8-bit pixels. Four consecutive pixels are packed into one 32-bit word, little endian: the first pixel goes in bits 7:0. Between Region and the memory, the only storage needed is therefore the three bytes that wait for the fourth, plus a small word FIFO that absorbs bus latency. So an image occupies words 0 … 23039 of a bank, a small corner of the bank's 524,288 words.

| Frame | Written by Region | Read by Contour |
|---|---|---|
| *i* | image 0 → bank 0, image 1 → bank 1 | previous frame from banks 2, 3 |
| *i+1* | image 0 → bank 2, image 1 → bank 3 | frame *i* from banks 0, 1 |

Per frame, Region makes 2 × 23040 word writes and Contour 2 × 23040 word reads, 92,160 accesses in all. The two banks of a pair work in parallel, so each side needs only 23,040 non-overlapping memory cycles per frame. The pixel rate is far below the memory's clock rate. At 13.5 Mpixel/s and 92,160 pixels a frame, the input runs at about 146 frames/s.

`bank_swap` makes the exchange:

- It waits until both frame writers report `frame_done` for the last word of the frame.
- If Contour has reported `rd_frame_done` for its previous frame, or has none, the pairs swap:
  - `rd_frame_ready` tells Contour that a new frame is readable;
  - `frame_go` lets the writers continue into the other pair.
- If Contour is still busy, the just-written frame is **dropped**:
  - the writers overwrite the same pair with the next frame;
  - Contour keeps its frame undisturbed;
  - `frames_dropped` counts up.

  Dropping frames rather than stalling the video is this design's choice. The original analysis assumes that Contour keeps up.

Routing is combinational: bank *b* is wired to writer or reader *b mod 2*, according to `wr_pair`. An assertion checks that the roles only change while no master has a bus cycle open. This always holds, because the writers are idle at the end of a frame and Contour must have finished its reads before it reports done.

### Frame writer

The writer cannot hold pixels back: they come straight from the video path. It packs them into words and queues the words in an 8-word FIFO. A Wishbone master waits until `BURST_MIN` words (4) are queued, or until the rest of the frame is queued, and then writes all queued words as one linear incrementing burst.

- A 4-word burst takes 5 clocks.
- A frame whose word count leaves a remainder of one ends with a single write.
- A pixel that finds the FIFO full is lost and `overflow` pulses. At the default sizes this does not happen: even with a video sample on every clock, a word arrives only every 8 clocks, and a 4-word burst takes 5.

After the last word of a frame, the writer waits for `frame_go` before it writes into the next frame. Pixels keep queueing meanwhile.

### Frame reader (Contour's port)

A request is a word address and a length from 1 to `RD_MAXLEN` (256). A length of 1 becomes a classic single read and a longer one a linear burst. Words return on `rd_valid`/`rd_data`, and `rd_last` marks the final word. The port takes one request at a time. A burst of *L* words completes *L + 5* clocks after the request is accepted, and a single read after 6. This interface is this design's. The only assumptions about Contour are that it first scans each image and then accesses it at scattered places.

## Wishbone controller for one ZBT bank (`wb_zbt_ctrl`)

This is a Wishbone slave with registered feedback. `ACK_O` and `DAT_O` are flip-flops.

| Item | Value |
|---|---|
| Data bus | 32 bits, byte granularity (`SEL_I[k]` is bits 8k+7:8k), little endian |
| Address | 19 bits |
| `CTI_I` 010 with `BTE_I` 00 | starts a linear incrementing burst |
| Everything else | served as a classic cycle, including CTI 001 or 111 at the start of a cycle and non-linear BTE values |

Every SRAM access goes through a three-stage pipeline: a command register (C), then two data stages (D1, D2). This matches a pipelined ZBT part:

- the command is sampled at the clock edge that ends C;
- write data is driven, or read data captured, at the edge that ends D2.

A new command can start every clock. A burst therefore streams one word per clock, while a single access pays the whole pipeline.

Latencies, from the clock in which `STB_I` rises to the clock in which `ACK_O` is high, inclusive:

| Cycle | Clocks |
|---|---|
| single read | 5 |
| single write | 4 |
| burst read | 5 to the first word, then 1 per word |
| burst write | `ACK_O` from the 2nd clock, then 1 per word (*L*+1 in total) |

The single-access figures are those reported for the original registered-output controller. The pipeline that produces them is this design's.

State machine states: IDLE, SINGLE_RD, SINGLE_WR, ACK (drops `ACK_O` after a single access), BURST_RD, BURST_WR. Reset is asynchronous, and after each cycle the controller returns to IDLE.

**Burst reads** are hard to follow in the code:

- At the start, the controller issues reads ahead of the master, from an internal address counter.
- When the master ends the burst (`CTI_I` = 111 on an acknowledged beat), reads still in the pipeline are *flushed*: their data is discarded.
- Each pipeline entry carries a "live" flag, and starting a new cycle kills the entries of the old one. Without that, an old entry can acknowledge the next cycle.

**Rules for the master:**

- During a burst, the master keeps `STB_I` high until its end-of-burst beat; wait states inside a burst are not supported. An assertion checks this.
- The chip's own burst counter (ADV/LD) is not used: `mem_adv_ld_n` is held low and every command carries its address.
- The bidirectional data pins are split into `mem_dq_o`, `mem_dq_oe` and `mem_dq_i`. Add the tri-state buffer at the pad.

## Video acquisition (`video_acquire`)

The decoder sends 10-bit 4:2:2 samples in the order Cb Y Cr Y (CCIR 656). Only the 8 most significant bits of each sample are kept.

| Input | Meaning |
|---|---|
| `vid_valid` | qualifies a sample |
| `vid_sof` | marks the Cb that starts a frame |

A pixel (Y, Cb, Cr, column, row) is emitted as soon as its three components are known:

- the even pixel of a pair when its Cr arrives;
- the odd pixel with its own Y.

After 384 × 240 pixels the block ignores samples until the next `vid_sof`. A `vid_sof` in the middle of a frame restarts the frame and pulses `resync`. Decoding the SAV/EAV timing codes into `vid_sof`/`vid_valid` is left to the board wrapper.

## Motion-detection pipeline (`motion_detect`)

The stages are joined by valid/ready handshakes and handle one pixel per clock. The caller streams each background pixel alongside the current pixel, in raster order; where the background is stored is up to the system.

1. **`grey_level`**: Y = 0.299 R + 0.587 G + 0.114 B, computed as (77 R + 150 G + 29 B + 128) >> 8. It is applied once to the current frame and once to the background. The 8-bit fixed-point form differs from the exact real value by at most 1.
2. **`diff_threshold`**: d = |Y_cur − Y_bg|, set to 0 when d < `threshold`. A difference equal to the threshold is kept. The source's prose says "larger than" while its reference algorithm zeroes only values below; the latter is followed. Thresholds of 15 and 60 were used in the original evaluation.
3. **`erosion_filter`** × 2: each non-zero interior pixel is replaced by the minimum of its four neighbours: up, down, left and right, with the centre excluded. Zero pixels and the outer border pass unchanged.
4. **Overlay and count**:
   - `out_diff` is the eroded difference.
   - `out_red` = background red + difference, saturated at 255.
   - At the end of each frame, `frame_done` pulses with `moved_pixels`, the number of non-zero pixels, and `motion` = (`moved_pixels` ≥ `min_pixels`).

   The detection rule is this design's. The original counts moved pixels but leaves the decision to a later stage.

**How the erosion stream works.** It is the least obvious part of the pipeline.

- **Line buffers.** The filter keeps two line buffers: the previous row and the current row.
- **Building the neighbourhood.** When the pixel at (r+1, c) arrives, it is the lower neighbour of (r, c). The other neighbours of (r, c) come from:
  - the previous-row buffer, for the upper one;
  - the current-row buffer at c+1, for the right one;
  - a register holding the old value at c−1, for the left one.

  So output row r appears while input row r+1 streams in. The latency is one row plus a clock.
- **End-of-frame drain.** After the last pixel of a frame, the last row is still in the buffer. The stage drops `in_ready` for W clocks while it emits that row (`out_flush` high). This is the only time it stalls its source.
- **Memory.** Two passes at 408 × 306 hold 19,584 bits of row storage in total. This includes the red channel, which travels alongside the difference for the overlay.

The default frame of 408 × 306 (124,848 pixels) is the size of the sequence the algorithm was evaluated on.

## LED blinker (`led_blinker`)

A free-running 22-bit counter divides the 27 MHz board clock. LED 0 follows its top bit and LED 1 the complement, so the LEDs change over every 2^21 clocks: a 6.4 Hz blink. The LEDs are registered on the board clock; the divided signal is not used as a clock. `led_toggle` pulses at each change.

## Parameters of `imgproc_top`

| Parameter | Default | Meaning |
|---|---|---|
| `FRAME_W_P`, `FRAME_H_P` | 384, 240 | gesture frame size (width even, W·H divisible by 4) |
| `WR_FIFO` | 8 | words queued per frame writer |
| `WR_BURST` | 4 | words collected before a write burst (≤ `WR_FIFO`) |
| `RD_MAXLEN` | 256 | longest Contour read request |
| `MD_W`, `MD_H` | 408, 306 | motion-detection frame size |
| `MD_PASSES` | 2 | erosion passes |
| `LED_DIV` | 22 | LED divider bits |

Shared types and constants are in `imgproc_pkg`:

- the Wishbone request and response structs `wb_m2s_t` and `wb_s2m_t`;
- the CTI and BTE encodings;
- the memory widths.

Reset is asynchronous and active high everywhere. Generic synthesis of the top gives about 1100 cells and 20 kbit of memory arrays. The memory arrays are the erosion line buffers and the write FIFOs.

## Departures and limits

- **Region and Contour are not built.** The top is built on these assumptions:
  - Region delivers one pixel of each output image per input pixel (`region_out_*`), in raster order with a start-of-frame mark;
  - Contour uses the two read ports and the `contour_frame_ready` / `contour_frame_done` handshake.
- **Later gesture stages and a fifth bank are not included.** Ellipse fitting, graph matching, the activity models, the on-chip storage of contour lists and a fifth SRAM bank belong to the later gesture stages.
- **Frames are dropped when Contour is late**, as described above. Without this, the video would have to stall.
- **Clocking.** Video samples enter with an enable on the system clock (27 MHz or faster). A separate decoder clock domain would need a synchronising FIFO, which is not included.
- **Only one controller is built.** It is the registered-output design: 5 and 4 clocks for a single read and write. An earlier, unregistered variant with about 3 clocks per access is not included.
- **Write bursts.** The frame writer collects 4 words before a burst. Writing every word singly would cost about 4 clocks per word instead of about 1.25.

## Verification

Each block has a self-checking testbench in `tb/`. Each one:

- compares against values computed independently in the testbench;
- checks cycle counts where timing is specified;
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_wb_zbt_ctrl` | single and burst reads and writes with byte selects against a shadow memory, exact latencies, 300 random operations |
| `tb_frame_writer` | packing, burst and single writes, waiting for `frame_go`, FIFO overflow |
| `tb_frame_reader` | 200 random requests, data, `rd_last`, latency |
| `tb_bank_swap` | routing, swap, drop and counting |
| `tb_video_acquire` | sample order, numbering, end of frame, resync |
| `tb_grey_level`, `tb_diff_threshold` | arithmetic against a real-valued model, full throughput |
| `tb_erosion_filter` | 13 frames against a reference erosion, drain length, throughput |
| `tb_motion_detect` | frames with and without a moving block, thresholds 15 and 60, counts and decisions |
| `tb_led_blinker` | change-over interval, one LED lit |
| `tb_imgproc_top` | end to end at small sizes (36 × 5 gesture frames, 16 × 10 motion frames) |
| `tb_imgproc_top_full` | the same at every default: four 384 × 240 frames with a video sample on every clock (the heaviest load on the writers) and three 408 × 306 motion frames |

The end-to-end environment (`tb/imgproc_env.sv`) surrounds the top with:

- four SRAM models (`zbt_sram_model`, behavioural);
- a stand-in for Region: image 0 is Y, image 1 is Cb xor Cr;
- a stand-in for Contour that checks every word of each frame handed to it, read both by bursts and by single reads.

It holds one frame long enough to force a dropped frame. It then checks that frames 0, 1 and 3 reach Contour and that exactly one is dropped. It counts each mechanism and fails if any never happened:

- single and burst writes;
- swaps and the drop;
- burst and single reads;
- erosion drains and input stalls;
- output back-pressure;
- motion and no-motion decisions;
- LED change-overs.

The full-size run takes about 10 s.

To run a testbench with Verilator 5 from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/imgproc_pkg.sv tb/tb_imgref_pkg.sv tb/tb_imgproc_top.sv --top-module tb_imgproc_top
./obj_dir/Vtb_imgproc_top
```

Replace the last file and the top module name to run another testbench.
