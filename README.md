# FPGA feature matcher for high-resolution aerial images

SystemVerilog model of the FPGA half of a CPU-FPGA image-matching system.
The host sends image strips and feature vectors over PCIe. The FPGA returns:

- corner coordinates, found by a four-test corner detector;
- for each query vector, the best and second-best Hamming distance (HD)
  over the reference vectors.

Scale estimation, BRISK description and the ratio test run on the host. They
are not part of this hardware.

## Data flow

```
rx_st_* ─► tlp_rx ─┬─► pixel_unpack ─► corner_detector ──────────┬─► corner_*
 (64-bit           │     (4 px/word)   shift_ram_window 11x11   │
  Avalon-ST)       │                   corner_eval (C1..C4)     ├─► tlp_tx ─► tx_st_*
                   │                   nms_5x5                  │
                   └─► query_deser ─► hd_matcher ───────────────┴─► m_*
                        (16 x 32 b)    ref_sram 16 x 128 x 512 b
                                       128 x hd_calc, top-2 compare
ref_wr_* (128-bit, from the DDR3 controller) ─► ref_sram
```

- **tlp_rx** takes memory-write TLPs with 3-DWORD headers and emits one
  32-bit payload word per clock. It drops all other TLPs. Address bit 20
  (`CH_BIT`) separates image words from query words.
- **pixel_unpack** turns each word into 4 pixels, byte 0 first.
- **shift_ram_window** chains 11 line memories of 2048 x 8 bits. It
  presents an 11x11 pixel window.
- **corner_eval** (inside corner_detector) works on one centre pixel per
  clock:
  - **grad_avg**: 3x3 gradients and the average of the 8 neighbours, at the
    centre and on a radius-3, 16-pixel ring.
  - **dir_map**: maps the gradient to one of 8 directions (Dx, Dy).
  - **c1_background**: the gradient magnitude must be at least 1.25 times
    the local average.
  - **c2_symmetry**: compares the two ring points 90 degrees from P0; the
    grey change at them becomes the corner score.
  - **c3_direction**: the gradient must turn by more than a threshold (tan
    = 93/256) between the centre and P0.
  - **c4_shape**: the ring is coded bright/dark and rotated to the
    gradient direction; it must show exactly one bright arc that starts at
    P0 and stops before the opposite point.
- **nms_5x5** keeps a candidate only if its score is the largest in its 5x5
  neighbourhood. Ties go to the earlier pixel in raster order.
- **corner_detector** then drops corners within 6 pixels of the strip edge.
  A corner comes out 5 clocks after the pixel 8 lines and 7 pixels later has
  entered. The host appends 8 blank rows to flush the last corners of a
  strip.
- **query_deser** builds a 512-bit query from 16 words.
- **hd_matcher**:
  - Each clock, it reads one 128-vector block of ref_sram and runs 128
    hd_calc units (XOR plus popcount).
  - A comparison tree finds the best two distances of the block in the same
    clock.
  - A running merge combines the 16 blocks.
  - `n_ref` masks unused vectors.
  - A new query starts every 16 clocks. The result appears DEPTH + 3 clocks
    after the query is accepted.
- **tlp_tx** writes each corner `{y, x}` and each match
  `{0, second, idx, best}` to host memory as a one-DWORD memory-write TLP.
  Corners go to a ring at 0x1000_0000 and matches to a ring at 0x1010_0000.
  Each source has a 16-word FIFO, and the two sources alternate. A lost
  word sets a sticky `tx_overflow` bit.

Parameter defaults follow the source article: 2048-pixel lines, 11-line
buffer, 128 HD units, 16 blocks, 2048 reference vectors, 512-bit
descriptors, K1 = 1.25, K2 = 0.125.

## Timing against the article's Table 2

The matcher takes 16 clocks per query for each 2048-vector load of the
SRAM. At 100 MHz:

| Image pair | Clocks | Time | Article |
|---|---|---|---|
| Medium pair | 80,038 x 16 x ceil(85,498/2048) | 538 ms | 548 ms |
| High pair | 1,217,688 x 16 x 571 | 111 s | 111.4 s |

Detection runs at one pixel per clock: 230 ms and 2.13 s for the two
pairs. The article reports 462 ms and 8.56 s for the same
work without explaining the difference.

## Design choices where the article is silent or inconsistent

- The article gives the line buffer as 22 Kbit, but 11 x 2048 x 8 bits is
  180,224 bits. This design uses the full 11 lines of 2048 pixels.
- The local average sums the 8 neighbours and drops 3 bits, so the centre
  pixel is left out. The article describes a sum of 3 rows of 3 pixels, but
  also divides by 8 and calls the average an 8-neighbourhood one.
- The article calls an SRAM data block 65,536 bits but gives its shape as
  16 deep by 4096 wide. Here one SRAM row holds 128 vectors of 512 bits
  (65,536 bits), and 16 rows hold the 2048 vectors.
- The NMS has 4 line memories of its own, in addition to the detector's
  window.
- Line memories are read asynchronously. This keeps the window aligned
  without extra pipeline bookkeeping.
- The PCIe beat layout is the common 64-bit Avalon-ST layout:
  - the first beat carries DW0 and DW1;
  - DW2 sits in the low half of the second beat;
  - the payload starts in the high half if address bit 2 is set.
  The ready latency is 0.
- The result-return packet format, host addresses and FIFO sizes are
  invented here. The article only says that results go back to the CPU.
- Frame start, strip height (`img_h`) and the number of valid reference
  vectors (`n_ref`) are plain input ports, not registers.
- With more than 2048 reference vectors, the host reloads the SRAM through
  `ref_wr_*` and merges the per-load top-2 results itself.
- The PCIe hard IP, the DDR3 memory and its controller, and the host
  software are not modelled.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and then stops.
`tb_feature_match_fpga` runs the whole design at full size (about 15 s):

- a 2048 x 16 strip, compared with a software reference model;
- 40 queries against 2048 reference vectors;
- results read back from the transmit stream while the host side throttles
  it.

It also counts every mechanism of the design and requires each one to
occur.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fm_pkg.sv tb/fm_ref_pkg.sv tb/tb_feature_match_fpga.sv \
    --top-module tb_feature_match_fpga
./obj_dir/Vtb_feature_match_fpga
```

Replace the testbench name to run any other `tb/tb_<block>.sv`.
`fm_ref_pkg.sv` is only needed by the testbenches that use the reference
model, but including it always is harmless.
