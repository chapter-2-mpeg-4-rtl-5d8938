# MPEG-4 simple-profile video encoder core

This is the datapath and control of a macroblock-pipelined MPEG-4 video encoder for CIF frames (352x288, 396 macroblocks). The core moves each macroblock through three stages that run at the same time:

1. **motion unit**: hierarchical motion estimation, then motion compensation;
2. **texture coding**: DCT, quantisation and reconstruction;
3. **variable length coding (VLC)**: run length coding, Huffman-style code words and bit packing.

All three stages share one external memory bus. That bus is arbitrated so that the bitstream never stalls, and the reconstructed frame goes through FIFOs and is written only when the bus is idle.

The motion search is the most expensive part. It is hierarchical:
- Both frames are first downsampled to 1/2 and 1/4 size.
- A ±4 full search on the 1/4 image keeps the two best candidates.
- Each candidate is refined by ±2 on the 1/2 image, and the winner by ±2 at full size.
- This reaches ±22 pixels with about 440 cycles per macroblock. A full search would need tens of thousands.

Texture coding (DCT, quantiser, IDCT) is **not** part of this RTL. Its interface is brought out as ports, so a texture coder can be attached.

## Block overview

| module | role |
|---|---|
| `mpeg4_encoder` | top: controller, motion unit, VLC, downsamplers, bus arbiter, reconstruction path |
| `encoder_ctrl` | frame/slot state machine, macroblock counter, frame-memory role switch |
| `downsample_unit` | whole-frame Level0 → Level1 → Level2 downsampling, four rows per loop |
| `motion_estimator` | three-level search built from two `bsu2d` arrays |
| `bsu2d` | 5x5 array of SAD processing elements (one 4-wide strip, 25 positions) |
| `mc_unit` | prediction fetch with chroma bilinear interpolation, residue, reconstruction |
| `mb_downsampler` | downsamples each reconstructed macroblock to Level1/Level2 for the next frame |
| `dc_pred_dir` | intra AC/DC prediction direction and scan-order choice |
| `vlc_unit` | `vlc_coef_buffer` → `rlc` → `rlc_fifo` → `huff_coder` → buffer → `packer` |
| `vlc_coef_buffer`, `scan_remap` | ping-pong coefficient RAM with zigzag / alternate scan address remap |
| `bus_arbiter`, `sync_fifo` | VLC > ME > reconstruction priority; two pairs of 48x32 FIFOs |
| `mpeg4_pkg` | shared types (pixel, SAD, motion vector, coefficient, symbol, code word) |

## Macroblock pipeline and its controller

`encoder_ctrl` moves through these states: idle, VLC init, I-frame texture/VLC loop, downsampling, P-frame ME/texture loop, P-frame texture/VLC loop, frame finish.

**I frames.** Texture coding of macroblock *k* runs alongside VLC of macroblock *k−1*. The loop alternates between the two I states 396 times. After the last macroblock the controller downsamples the reconstructed I frame, so that the next P frame has Level1/Level2 reference images.

**P frames.**
- The current frame is downsampled first.
- In time slot *j*, three things start together: ME (then the MC fetch) of MB *j*, texture of MB *j−1*, and VLC of MB *j−2*.
- The slot ends when every started unit has reported done. Then the ping-pong buffers swap: MC previous MB, VLC coefficient RAM and reconstruction FIFOs.
- Slot 0 has only ME. The last two slots have no ME. That gives 396 + 2 slots per frame, with 394 returns to the ME state.

**Frame end.** The controller flushes the packer to a whole 32-bit word. It then writes 0x03 to the DMA controller's status register (`dmac_wr`/`dmac_data`), which moves the bitstream out.

**Frame memories.** Two memories swap roles between "current" and "reference" on every P frame except the first after an I frame (`mem_sel`).

The MB position advances when the MC fetch completes. `motion_estimator` and `mc_unit` read `mb_x`/`mb_y` directly and do not latch them, so the position must stay stable until then.

## Hierarchical motion search (`motion_estimator`, `bsu2d`)

**The BSU array.** `bsu2d` is a semi-systolic 5x5 array. Current pixels enter one per cycle, column-major through a 4-wide strip.
- PE(x,y) sees each pixel 5y+x cycles late.
- Each PE chooses between two previous-frame streams (left and right part of the window). The choice depends on the pixel's column plus the PE's x offset.
- Exactly one PE finishes per cycle: lane 5y+x.
- Consecutive passes carry a parity tag, so one pass can start before the previous one has drained.

**Two arrays.** The estimator uses two `bsu2d` instances. Their streams are fixed by delay lines:
- BSU0: current1 / previous1 / previous2 delayed 4.
- BSU1: current1 or current2 delayed 4 / previous2 delayed 4 / previous3 delayed 8.

**The three levels:**
- **Level 2** (4x4 block, 12x12 window, ±4): the two arrays cover the upper and lower halves of the 9x9 positions. The block is fed twice. A comparator keeps the two best distinct positions.
- **Level 1** (8x8, ±2 around each candidate): BSU0 covers columns 0–3 and BSU1 columns 4–7. Their SADs are added per position in a 25-word circular buffer; the first accumulation adds 0. The comparator then scans the 25 sums. This is done once per candidate.
- **Level 0** (16x16, ±2 around the best Level-1 vector): two rounds of 8 columns, accumulated in the same buffer. The second round starts 88 cycles after the first.

**Result.** The final vector is 4·mv₂ + 2·d₁ + d₀.

**Tie-breaking.** Ties keep the first position found. Scan order is row-major from the top-left of the window.

**Timing.** One search takes **444 cycles** from `start` to `done`. The published schedule quotes 495 cycles per vector. The per-level schedules differ: Level 2 takes 62 cycles here against the published 56, and Levels 1 and 0 overlap their passes differently.

**Memory side.** The unit reads two current-MB pixels and three previous-frame pixels per cycle, at signed frame coordinates. Data must arrive one cycle after the address. Edge handling belongs to the memory.

## Downsampling

`downsample_unit` takes four Level0 pixels per cycle:
- An even row stores its pair sums in RAM1.
- The odd row completes four Level1 pixels. They are floor(sum/4), packed into a word for RAM2/RAM3.
- Level1 pairs are handled the same way through RAM4 into RAM5, which gives Level2.

A CIF frame is 72 loops of four rows, 25,344 input cycles in total. Level2 is computed from the already-truncated Level1 pixels.

`mb_downsampler` does the same per reconstructed macroblock. It takes one 8-pixel row per cycle, so the next frame's reference Level1/Level2 images are ready without a second pass.

## Motion compensation (`mc_unit`)

**Fetch.** Luma vectors are whole pixels. Chroma uses the luma vector as a half-pel chroma vector, and each chroma pixel is (a+b+c+d+2)>>2 of its neighbours. The fetch takes 769 cycles (256 luma reads plus 4 reads per chroma pixel).

**Residue.** The prediction is stored in one bank of the ping-pong "previous MB" buffer. The residue, current minus prediction, goes to the texture coder.

**Reconstruction.** In the same slot, IDCT output of the previous macroblock is added to the other bank and clipped to 0..255.

## Variable length coding

```
coef RAM (ping-pong, scan remap) -> RLC -> RLC FIFO -> Huff coder -> buffer -> packer -> 32-bit words
                header/DC table words --------------------------^
```

**`vlc_coef_buffer`.** The texture coder writes each block in raster order. The reader gives a scan position, which is remapped to a raster address:
- zigzag and alternate-horizontal come from tables;
- alternate-vertical is alternate-horizontal with row and column bits swapped.

**`rlc`.** For each macroblock it:
1. asks the external header table for its code words (mcbpc, cbpy, mvd);
2. sends each intra DC to the DC table;
3. run-length codes the AC coefficients of coded blocks.

Table requests wait until the symbol path is empty, which keeps the bitstream in order.

**`rlc_fifo`.** A symbol only knows it is a block's last after the scan reaches position 63. So this FIFO holds back its newest entry. Its output is valid when it holds two or more symbols, or one whose Last flag is set. `rlc` pauses reading at DEPTH−1 entries.

**`huff_coder`.** Codes every (last, run, level) symbol as an MPEG-4 **escape type 3** word (30 bits), which is legal for any symbol. The normal variable-length table and the escape 1/2 forms are not included. The bitstream is therefore valid but larger than it needs to be.

**`packer`.** Appends code words MSB-first into a 64-bit residue register and emits a word whenever 32 bits are collected. Flush pads the last word with zeros.

## Bus and reconstruction FIFOs

`bus_arbiter` serves three requesters on one valid/ready bus. Priority is fixed: VLC bitstream writes, then ME window reads, then reconstruction writes.

The reconstructed pixels come four per word, with planar Y/U/V addresses from `RECON_BASE`. They go into one of two pairs of 48x32 FIFOs:
- Each pair is an address FIFO plus a data FIFO.
- The pair being filled switches every macroblock.
- A pair is drained whenever neither the VLC nor the ME wants the bus.
- When the pair being filled is full, `recon_ready` drops and holds the MC adder.

The bitstream is written from `BS_BASE`, which restarts every frame.

## Top-level ports

`mpeg4_encoder` brings out everything the core does not contain:
- the frame start/type controls;
- the ME search-window read ports (`me_*`, one-cycle latency) and a loader port for that buffer (`ld_*`);
- the MC reference fetch (`mc_ref_*`) and current-MB load (`mc_cur_wr_*`);
- the texture coder (`tex_*`): residue out, quantised coefficients and side information in, IDCT output in block/row order Y1..Y4, U, V;
- the header/DC code tables (`lut_*`);
- the frame to be downsampled (`ds_in_*`) and the Level1/Level2 result writes (`ds_l1_*`, `ds_l2_*`, `mbd_*`);
- the system bus (`bus_*`) and the DMA status write (`dmac_*`).

Status outputs (`unit_busy`, `ctrl_state`, `bus_grant`, `vlc_rlc_pause` and others) make the pipeline observable.

Parameter defaults are the CIF configuration: `IMG_W`=352, `IMG_H`=288, `N_MB`=396, `FIFO_DEPTH`=48.

## How it departs from the published design

- **Motion estimation** takes 444 cycles per macroblock, where the published number is 495. The Level-2 phase takes 62 cycles instead of 56.
- **Huffman coder:** escape type 3 only; there are no standard VLC tables.
- **Packer:** one shifter into a 64-bit residue instead of two 16-bit barrel shifters. The output bits are the same.
- **RLC FIFO:** a single symbol whose Last flag is set may also leave, so that every block drains.
- **Pipeline start:** all three stages of a P slot start together, and the slot waits for all of them.
- **FIFO pairs:** "two pairs of FIFOs" is read as two address+data pairs working ping-pong.
- **Own choices where the description gives nothing:**
  - the bus handshake;
  - the memory layouts (planar reconstruction, MB buffer indexing);
  - the texture-coder output order;
  - tie rules;
  - all word widths apart from the 12-bit escape level.
- **DC prediction direction:** `dc_pred_dir` is built and brought to ports. The DC values it compares come from the (absent) texture coder.

Not included: DCT/quantiser/IDCT, the header and DC code tables, the ME input buffer, the external memories and the host/DMA controller.

## Performance seen in simulation

These figures come from the full-size testbench: CIF, default parameters, a texture model of about 770 cycles per macroblock, and a bus that inserts random wait states (ready about 80% of cycles).

| | cycles |
|---|---|
| ME per macroblock | 444 |
| MC fetch per macroblock | 769 |
| I frame | 335,908 |
| P frame | ≈512,500 (≈1,294 per slot; the published estimate is about 1,200) |
| 30 frames, 1 I + 29 P | ≈15.2 M (the published estimate is 21 M) |

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. The end-to-end environment is `tb/tb_mpeg4_encoder_env.sv`:
- **Texture model:** lossless (coefficients = residue, IDCT output = residue), so every reconstructed frame must equal the source frame.
- **Test frames:** each one is the previous frame shifted by a known vector, and the testbench checks the motion vectors found on interior macroblocks.
- **Checks:** it parses the whole bitstream and checks every symbol against the coefficients sent. It also checks the DMA writes, frame-memory switching and bus priority.
- **Coverage:** it counts every mechanism (bus wait states, VLC pre-emption, load stalls, RLC FIFO pauses, half-pel chroma, all three scan orders, memory swaps, downsampling loops) and fails if any count is zero.

The two end-to-end testbenches:
- `tb_mpeg4_encoder` runs it at 64x48 for 4 frames, in a few seconds.
- `tb_mpeg4_encoder_full` runs the top at its default CIF parameters, 4 frames, in well under a minute.

To run one with verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_mpeg4_encoder rtl/mpeg4_pkg.sv tb/tb_mpeg4_encoder.sv
./obj_dir/Vtb_mpeg4_encoder
```

Replace the top module to run a block testbench, for example `tb_motion_estimator` or `tb_vlc_unit`.

Lint leaves a few unused-bit warnings in `downsample_unit`, `mc_unit` and `rlc`. Those bits are truncations, or fields used elsewhere; each module's header explains its case.
