# HEVC intra prediction engine and in-loop filter

This is synthesizable SystemVerilog for two area-lean parts of an HEVC encoder:

- **Intra prediction engine.** It predicts prediction units (PUs) of 4x4 to 32x32 samples in all 35 HEVC intra modes, at eight samples per clock.
  - It always emits samples in raster order, row after row, whatever the prediction direction. A transform that consumes rows can therefore take the output directly, with no block buffer between the two.
  - It keeps a compact 776-bit reference buffer.
  - Planar and angular prediction share one multiply-add unit.
- **Integrated in-loop filter.** A deblocking filter (DF) and a sample adaptive offset (SAO) filter work on 64x64 coding tree units (CTUs), with eight samples per clock in and out.
  - The DF avoids a transpose memory by writing every sample twice: once at its normal address and once at an address whose two halves are swapped.
  - It filters vertical and horizontal edges at the same time and averages the two results.
  - The SAO gathers per-category statistics, picks edge offset, band offset or no filtering with a fast rate-distortion estimate, and applies the choice.

The two parts stand side by side in `hevc_top`. They share only the clock and the reset.

All samples are 8 bits (`hevc_pkg::BITDEPTH`).

## 1. Intra prediction pipeline

`intra_engine` is a five-stage pipeline, one clock per stage:

| stage | module | work |
|---|---|---|
| RS | `intra_ref_select` | register the neighbours and substitute the missing ones |
| F  | `intra_ref_filter` | smoothing: none, [1 2 1], or strong bilinear |
| RB | `intra_ref_buffer` | build the 97-entry main reference array of the mode |
| O  | `intra_am_unit` or `intra_dc_pred` | eight predicted samples |
| P  | output register | `out_valid`, `out_first`, `out_last`, `out_pix[8]` |

**Interface.**
- A PU is started with `start` while `ready` is high.
- With it come:
  - `mode` (0 is planar, 1 is DC, 2..34 are the angular modes);
  - `log2n` (2..5) and `chroma`;
  - a 5-bit availability `{LB, L, C, T, TR}`;
  - the raw neighbours: `corner`, `top[k]` (the row above) and `left[k]` (the column to the left), for k < 2N.

**Timing.**
- The first eight samples appear 5 cycles after `start`.
- One beat of eight samples follows every cycle: N²/8 beats, i.e. 2, 8, 32 or 128.
- `ready` returns when the last beat has been issued. Back-to-back PUs therefore take N²/8 + 3 cycles each: 5, 11, 35 and 131 cycles.

**Row-wise lanes.** Beat *b* carries raster positions 8b..8b+7 of the PU.
- For a 4x4 PU, that is two rows.
- For an 8x8 PU, one row.
- For larger PUs, an eighth or a quarter of a row.

Each lane derives its own (x, y) from the beat number. For the angular modes, each lane then computes its own integer offset and fraction from the mode angle:

- `ind = ((d+1)·angle) >> 5` and `frac = ((d+1)·angle) & 31`;
- d is y for vertical modes (18..34) and x for horizontal modes.

Horizontal modes therefore cost nothing extra. They come out row by row like everything else.

## 2. Reference selection and smoothing

**Availability.** Five flags mark the neighbour groups: left-bottom, left, corner, top and top-right. Each group is N samples long, and the corner is one sample.

**Substitution.** `intra_ref_select` walks the 4N+1 samples:
- from the bottom of the left column, up through the corner, then along the top to the right;
- a missing sample copies the one before it;
- a missing first sample copies the first available one;
- the whole set is 128 when nothing is available.

**Smoothing.** `intra_ref_filter` applies the HEVC rule:
- It never filters 4x4 PUs, DC or chroma.
- For angular modes, it filters when min(|m−10|, |m−26|) exceeds 7, 1 or 0 for 8x8, 16x16 or 32x32 PUs.
- It always filters planar for N ≥ 8.
- For 32x32, it replaces the [1 2 1] filter by a bilinear ramp between the corner and the far ends when both the top and the left sets are nearly linear (|c + R[63] − 2·R[31]| < 8).

## 3. The compact reference buffer

A 32x32 angular prediction only ever reads main-array positions −32..+64, which is 97 samples, or 776 bits.

`intra_ref_buffer` builds exactly that array for the selected mode and registers it in one cycle:
- **Main side.** For vertical modes, position k > 0 holds the top sample k−1; for horizontal modes it holds the left sample k−1. Position 0 holds the corner.
- **Negative angles.** The negative positions hold side-array samples projected through the inverse angle: `main[k] = side[((k·invAngle + 128) >> 8) − 1]`.

Position k sits at `ref_o[k+32]`. The prediction datapath then needs only a multiplexer per lane into this one array.

## 4. Shared multiply-add unit and the predictors

`intra_am_unit` has eight lanes. Each lane computes `clip((s0·w0 + s1·w1 + s2·w2 + s3·w3 + rnd) >> shift)`.

**Planar.** `intra_planar_pred` fills all four products:
- samples `left[y]`, `top[N]`, `top[x]`, `left[N]`;
- weights `N−1−x`, `x+1`, `N−1−y`, `y+1`;
- `rnd` = N and `shift` = log2N + 1.

**Angular.** `intra_angular_pred` uses two products:
- samples `ref[ind+1+along]` and the next one;
- weights `32−frac` and `frac`;
- `rnd` = 16 and `shift` = 5.

**DC.** `intra_dc_pred` is separate and needs no multipliers.
- It computes the DC value `(Σtop + Σleft + N) >> (log2N+1)`.
- For luma PUs smaller than 32x32, it smooths the first row and column toward the references.

## 5. Deblocking filter (DF)

**Edge filter.** `df_edge_filter` is combinational and handles one four-line edge segment (p3..p0 | q0..q3 per line). Lines 0 and 3 drive the decisions:
- **On/off:** the segment is filtered when Bs > 0 and `dp0 + dq0 + dp3 + dq3 < β`.
- **Strong:** for both lines, `2(dp+dq) < β/4`, `|p3−p0| + |q0−q3| < β/8` and `|p0−q0| < (5tc+1)/2`.
- **Normal, second sample:** the p1 and q1 side decisions use `3β/16`.

The filters are the HEVC ones:
- **Strong:** p2..q2 are rewritten, clipped to ±2tc.
- **Normal:** p0 and q0 are corrected, clipped to ±tc, and skipped when |Δ| ≥ 10tc; p1 and q1 are optional.

All the arithmetic is signed and wide enough not to overflow.

**Window.** `df_top` filters one 8x8 window that straddles a corner of the 8x8 deblocking grid. The vertical edge lies between columns 3 and 4, and the horizontal edge between rows 3 and 4.

**Transposed addressing.** This is the key idea:
- A sample's 6-bit write address is {row, column} = {A,B,C,D,E,F}.
- As each row arrives, every sample is written into two 64-entry register images: the *normal* image at {A,B,C,D,E,F} and the *transposed* image at {D,E,F,A,B,C}.
- The rows of the transposed image are the columns of the window. The horizontal-edge filter (HF) can therefore read lines exactly as the vertical-edge filter (VF) reads rows of the normal image.
- No transpose pass or extra memory is needed, and VF and HF run at the same time.

**Averaging.** Each output sample is `(VF + HF + 1) >> 1`. The HF result is read back through the transposed address.

Timing: 8 load cycles, then 2 filter cycles (segments 0 and 1 of both edges), then 8 output rows.

`dec_valid`, `dec_on` and `dec_strong` report the decisions for monitoring.

The output is *not* bit-exact with a standard HEVC decoder. A standard decoder filters all vertical edges first and then the horizontal edges on that result, whereas this filter averages two independent passes.

## 6. Sample adaptive offset (SAO)

**Edge offset.** `sao_eo` classifies eight samples per cycle against their two neighbours along one of four directions (0°, 90°, 135° and 45°):
- category 1 is a local minimum;
- category 2 is a concave edge;
- category 3 is a convex edge;
- category 4 is a local maximum;
- category 0 is anything else, or a neighbour outside the CTU.

**Band offset.** `sao_bo` splits the range into 32 bands of 8. It applies four offsets to four consecutive bands starting at `band_pos`, wrapping past band 31.

**Statistics.** `sao_stats` is the sample-difference unit. It accumulates the count N and the sum E of (original − deblocked):
- per EO class and category (4 × 4);
- per band (32).

**Decision.** `sao_md` tries, for each of the 48 statistics entries, offsets of magnitude 0..7 in parallel, one entry per cycle:
- It uses the fast estimate `ΔJ = N·O² − 2·O·E + λ·R` with R = |O| + 1.
- The sign is + for EO categories 1–2, − for categories 3–4, and that of E for a band.
- A last cycle picks the cheapest of the four EO class sums, the 32 four-band windows and "off" (ΔJ = 0).
- `done` comes 49 cycles after `start`.

**Per-CTU schedule.** `sao_top` runs one CTU through four phases:
- **LOAD:** 512 cycles of deblocked and original samples into two word memories.
- **STAT:** 512 cycles. A 3x10 neighbourhood feeds four `sao_eo` instances, one per class, together with `sao_bo` and `sao_stats`.
- **MD:** 51 cycles.
- **APPLY:** 512 cycles, streaming the filtered CTU out with the chosen type.

## 7. In-loop filter scheduler

`inloop_filter` connects the two filters through a CTU buffer:

1. **LOAD.** The CTU's reconstructed and original samples arrive, eight per cycle (512 cycles).
2. **DF.** Each of the 49 interior grid corners (7 x 7) is deblocked in place. The 8x8 windows tile the CTU without overlap, so the order does not matter. This takes 19 cycles per window.
3. **FEED.** The deblocked CTU and the original are streamed into `sao_top` (512 cycles).

While SAO decides and applies, the next CTU already loads. At steady state, one 64x64 CTU leaves every 1955 cycles.

Edges on the CTU border are not deblocked, because that needs the neighbouring CTUs. Bs for vertical and horizontal edges, β, tc and λ are inputs that apply to the whole CTU.

## 8. Throughput

| configuration | needed | this RTL |
|---|---|---|
| intra, 3840x2160 4:2:0 @ 30 fps, 150 MHz | 373 M samples/s | worst case (all 4x4) 117 M cycles/s: fits |
| in-loop, 3840x2160 4:2:0 @ 30 fps, 200 MHz | 3060 CTU-equivalents/frame | 179 M cycles/s: fits |
| in-loop, 7680x4320 4:2:0 @ 40 fps, 200 MHz | 12240 CTU-equivalents/frame | 957 M cycles/s: **does not fit** (about 8 fps) |

Reaching 8K would need several DF windows in flight and the load and feed passes folded into the filtering.

## 9. Where this RTL departs from the reference architecture

**Intra engine**
- The engine does not write predicted border samples back into its neighbour store in Z-order. The caller supplies the neighbours with each PU.
- A new PU enters the reference stages only after the previous one has been issued. Reference preparation does not overlap prediction, which adds 3 cycles per PU.
- The angle and inverse-angle tables are the HEVC ones, built into functions in `hevc_pkg`. The main array is built for the selected mode only, not stored for every mode.
- Mode 18 is treated as vertical.
- The HEVC edge filters for pure horizontal and vertical prediction (modes 10 and 26) are not applied.

**Deblocking filter**
- β and tc are inputs; no QP table is included.
- The DF decisions use wide signed arithmetic rather than shrinking the sample range to stay within 8 bits.
- One DF window is filtered at a time.

**SAO**
- The bit estimate R = |O| + 1 is this design's choice.
- Neighbours outside the CTU count as unavailable for EO.

**Not built**
- The earlier planar/DC-only engines (a parallel-pipelined one and a parallel-datapath one).
- The earlier multi-mode engine with an output buffer and reconstruction.

The row-wise engine above supersedes all three.

## 10. Files

| file | contents |
|---|---|
| `rtl/hevc_pkg.sv` | sample type, AM operand struct, SAO type enum, angle tables, smoothing rule, clip |
| `rtl/intra_*.sv` | intra stages and the engine |
| `rtl/df_edge_filter.sv`, `rtl/df_top.sv` | deblocking |
| `rtl/sao_*.sv` | SAO units and the per-CTU controller |
| `rtl/inloop_filter.sv` | DF + SAO scheduler |
| `rtl/hevc_top.sv` | top level |
| `tb/*_model_pkg.sv` | behavioural reference models: intra prediction, DF window, SAO decision and filtering |
| `tb/tb_*.sv` | self-checking testbenches, one per block |

## 11. Simulation

Every testbench compares the design with the behavioural models in `tb/`.
- Each ends with a line `TB_RESULT checks=<n> failures=<n>`.
- Each has a watchdog that fails the run if it hangs.
- Where the design has a fixed latency, the testbench checks the cycle count.

`tb_hevc_top` runs the whole design at its default sizes:
- 50 intra PUs: all four sizes with twelve modes each, plus two flat 32x32 PUs;
- four 64x64 CTUs through the in-loop filter.

It counts each mechanism and fails if one never occurs:
- reference substitution, [1 2 1] and strong smoothing;
- positive and negative angles;
- DF off, normal and strong;
- SAO off, BO and EO.

With Verilator 5:

```sh
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/hevc_pkg.sv tb/intra_model_pkg.sv tb/df_model_pkg.sv tb/sao_model_pkg.sv \
  tb/tb_hevc_top.sv --top-module tb_hevc_top -Mdir obj -o sim
./obj/sim
```

For another testbench, replace `tb_hevc_top` with its name. The model packages can stay on the command line even when a testbench does not use them.

Lint a module with:

```sh
verilator --lint-only -Wall -Irtl -y rtl rtl/hevc_pkg.sv rtl/<module>.sv
```

Each module is a valid top on its own, and all parameters have defaults:
- `MAX_N` = 32 and `LANES` = 8 for intra;
- `CTU` = 64 for the in-loop filter.
