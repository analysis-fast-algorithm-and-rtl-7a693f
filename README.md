# H.264/AVC intra macroblock coder in SystemVerilog

This is a hardware encoder for H.264/AVC intra frames. For each 16x16 luma
macroblock it picks a 4x4 intra prediction mode for each of the 16 blocks,
transforms and quantizes the residuals, and reconstructs the pixels exactly
as a decoder would. It then writes the macroblock as a CAVLC-style bitstream
in 32-bit words. The architecture is built for throughput: a macroblock
takes 1189 cycles. At about 54 MHz that is enough for 720x480 luma at
30 frames/s.

Three ideas carry the design:

* **Four-way parallelism everywhere.** The predictor generator, the
  transform engine and the quantizer each process one 4-pixel row (or one
  4-coefficient column) per cycle. A 4x4 block passes any stage in four
  cycles, and the whole datapath runs on a fixed 4-cycle "slot".
* **Mode decision in the transform domain.** The cost of a candidate mode is
  `J = sum|Y| + lambda * R`. Y is the forward integer DCT of the residual
  (not a Hadamard transform, as reference encoders often use), and R is the
  mode signalling cost: 1 bit for the most probable mode, 4 bits otherwise.
  Using the DCT lets the winning candidate's coefficients go straight to
  the quantizer.
* **Two-stage macroblock pipeline.** The encoding loop (prediction,
  transform, mode decision, quantization, reconstruction) works on
  macroblock n+1. Meanwhile the bitstream unit (header, CAVLC, packer)
  codes macroblock n from a shared coefficient buffer.

## Block diagram

```
             ld_* (32-bit load port)
               |            |                   |
   current MB SRAM 96x32   dbbh (neighbour      upper block modes
               |           registers A..M)          |
               |            |                       |
               |     intra_pred_gen (4 PEs) <-- plane_setup (a, b, c, seeds)
               |            |   \
               +--(-)-------+    plane predictor SRAM 64x32
                   |
           multi_transform (fwd DCT / Hadamard)
                   |
     +-------------+--------------+
     |             |              |
 mode_decision  dc_coef_regs   quant_iq --> coef_buffer (4 x 96x16) --> cavlc_engine
 (J per mode)   (I16 dc x 4)      |                                      |
                                 best coeff regs (4x4 transpose)   exp_golomb (header)
                                  |                                      |
                           multi_transform (IDCT)                    vlc_packer --> bs_*
                                  |
                       + prediction, clip --> dbbh, reconstructed MB SRAM 96x32
```

## The encoding loop and its slot schedule

Everything in stage 1 is timed by 4-cycle slots, aligned to the
transform engine's block phase. In each slot one 4x4 block enters the
forward transform as four rows, and its coefficients leave during the next
slot. For each of the 16 luma 4x4 blocks, taken in the standard coding
order (8x8 quadrants, then 4x4 blocks within each, both raster), there
are 18 slots:

| slot  | work |
|-------|------|
| 0..8  | the nine 4x4 modes: prediction, residual, forward DCT; coefficients to `mode_decision` |
| 9..12 | the four 16x16 modes (V, H, DC, plane) for the same 4x4 area: AC cost summed per mode, DC to `dc_coef_regs`, plane predictors written to the plane SRAM |
| 13    | the winning 4x4 mode predicted and transformed again |
| 14    | quantize and dequantize; levels to `coef_buffer`, dequantized values to the best-coefficient registers |
| 15    | wait: the dequantized block completes in the registers (no engine input) |
| 16    | best-coefficient registers read out by rows through the inverse DCT |
| 17    | reconstruction `clip(pred + ((x + 32) >> 6))` to the neighbour registers and the reconstructed SRAM |

The 16x16 candidates are interleaved with the 4x4 ones for two reasons.
First, they fill the slots in which the 4x4 decision is still in flight.
Second, the predictor and transform hardware is then shared rather than
duplicated. Interleaving means the DCs of the 16x16 candidates must be
kept until the whole macroblock is done, because the 16x16 cost needs a
Hadamard transform of all 16 DC values. The DCs sit in `dc_coef_regs`
(4 modes x 16 values). After the last block, five further slots run the
four 4x4 DC matrices through the transform engine in Hadamard mode. The
16x16 cost is then `AC cost + (sum|Hadamard(DC)|) >> 2`.

Loading one macroblock takes 71 bus cycles. Stage 1 then takes
16 x 18 x 4 = 1152 cycles plus set-up and the Hadamard tail: 1189 cycles
in simulation.

### The neighbour registers (dbbh)

The 4x4 predictions need the 13 reconstructed pixels A..M around each
block. The "decoded block boundary handle" (`dbbh`) keeps them in
registers, so no memory read is needed:

* the bottom row of the latest reconstructed block in each pixel column;
* the right column of the latest block in each pixel row;
* the bottom-right pixel of every block, used as corner M.

The right column of a finished macroblock becomes the left neighbour of
the next one, so only the 21 pixels above (16 + 4 above-right + corner)
travel over the bus. When the above-right block is not yet coded, the
prediction uses pixel D in place of E..H, as the standard requires.

### The predictor generator

Each of the four processing elements is a small adder tree: four operand
multiplexers, two levels of adders, a round-and-shift stage and a clip,
plus a bypass path. The nine 4x4 modes use it as a three-tap or two-tap
filter on the neighbour edge (or as the bypass for V and H). DC uses PE
sharing so that the whole sum is formed in one cycle.

Two modes need extra set-up:

* **16x16 DC.** Four cycles of accumulation over the 32 neighbours.
* **16x16 plane.** The predictor at (x, y) is
  `clip((a + b(x-7) + c(y-7) + 16) >> 5)`. This is done without
  multipliers. `plane_setup` computes H, V, a, b and c with shift-and-add
  sums. It also computes one "seed" per 4-column group: the pre-rounded
  value of that group's top pixel. Inside a block, PE i outputs
  `seed + i*b`, and each later row adds c to the PE's accumulator.

### Transform engine

`multi_transform` holds two 1-D butterflies, which can be set to forward
DCT, inverse DCT or Hadamard, with a 4x4 array of transpose registers
between them. Rows enter the first butterfly and the array. The array
alternates every four rows between shifting downward and shifting
leftward, so a full block is always read out by columns while the next
block is written. The engine is busy every cycle and has four cycles of
latency.

Output vector k is column k of the 2-D result. The quantizer therefore
works column-wise. Before the inverse transform, the "best coefficient
registers" transpose the block back so the IDCT is fed rows.

### Quantization

Quantization is the standard H.264 scalar quantizer with the intra
rounding offset 1/3:

`Z = sign(W)(|W| MF + 2^qbits/3) >> qbits`, with `qbits = 15 + QP/6`.

Dequantization is `W' = Z * V << (QP/6)`. MF and V are the standard's
scaling tables, indexed by `QP % 6` and the position class. All four
lanes run in one registered stage.

## The bitstream unit

Stage 2 runs while stage 1 encodes the next macroblock:

1. **Header.** `mb_type` as ue(0) (I4x4). Then, per 4x4 block, either a
   1 (mode equals the most probable mode, `min(left, top)`, or DC when a
   neighbour is missing) or a 0 followed by 3 bits of the remaining mode.
   Then `mb_qp_delta` as se(0). The Exp-Golomb codes come from
   `exp_golomb`.
2. **Residuals.** `cavlc_engine` codes each of the 16 blocks:
   * It reads the block from the coefficient buffer in reverse zig-zag
     order (16 reads).
   * It counts total coefficients, trailing ones and zeros.
   * It buffers levels and runs in small FIFOs.
   * It emits one codeword per cycle: coeff_token, trailing-one signs,
     levels (H.264 prefix/suffix code with adaptive suffix length),
     total_zeros, and run_before (H.264 tables).
3. **Packing.** `vlc_packer` appends codewords of up to 32 bits, most
   significant bit first, into two ping-pong 32-bit registers. It emits a
   word whenever one fills. `flush_req` pushes out the last partial word.

The coefficient buffer holds a single macroblock, yet the two stages can
overlap. Stage 2 reads block k about 35 + 52k cycles after stage 1
starts the next macroblock. Stage 1 overwrites block k only at about
56 + 72k cycles. So each block is read before it is overwritten, and the
end-to-end test checks this bit-exactly.

## Where this differs from a complete H.264 encoder

* **Luma only.** Chroma prediction, transform and coding are not
  implemented, although the predictor generator and `plane_setup` support
  chroma modes.
* **Macroblocks are always coded as I4x4.** The 16x16 candidates are fully
  evaluated. Their best mode, cost and "16x16 would be better" flag are
  outputs, but there is no 16x16 residual path: the 16x16 DC and chroma
  DC quantizer paths are missing.
* **coeff_token and total_zeros are fixed-length codes:**
  * coeff_token is 6 bits: TotalCoeff-1 on 4 bits, then TrailingOnes on
    2 bits; an empty block is `000011`.
  * total_zeros is 4 bits.

  All other CAVLC symbols are the standard ones. No nC context is formed.
  The stream is therefore decodable, and the test bench decodes it, but it
  is not a conforming H.264 stream. Replacing the two table lookups in
  `cavlc_engine` (states `S_CTOK` and `S_TZ`) with the standard tables
  would make it conforming, once an nC input is added.
* **Header.** The header has no coded_block_pattern and no chroma
  prediction mode. The picture and slice headers are left to the host.
* **Exhaustive mode search.** All nine 4x4 modes whose neighbours exist are
  evaluated for every block. Skipping unlikely modes, subsampling and
  bit-width truncation are software speed-ups and are not used in the
  hardware.
* **Line buffer is outside the core.** The row of reconstructed pixels and
  block modes above the current macroblock lives outside. The host loads
  them through the load port.

## Interface and timing (`intra_coder_top`)

Parameters: `CUR_WORDS = 96`, `REC_WORDS = 96`, `PLANE_WORDS = 64` (32-bit
SRAM depths) and `COEF_WORDS = 96` (depth of each of the four 16-bit
coefficient banks). Only 64 current words and 64 coefficient words per
bank are used while chroma is absent.

1. **Load** while `busy` is low, one word per cycle with `ld_en`:
   * `ld_sel = 0`: current pixels. Word `4y + w` holds row y, columns
     4w..4w+3, with pixel x in byte x.
   * `ld_sel = 1`: the upper neighbours. Words 0..3 hold the 16 pixels
     above, word 4 the four above-right pixels, and word 5 byte 0 the
     above-left corner.
   * `ld_sel = 2`: one word with the modes of the four blocks above, in
     4-bit fields, block column i at `[4i+3:4i]`.
2. **Start.** Pulse `mb_start` together with `mb_left_avail`,
   `mb_top_avail` and `mb_topright_avail`. Hold `qp` and `lambda` stable
   while the coder is busy.
3. **Results.** `mb_done` pulses after 1189 cycles. `mb_modes[16]`
   (raster order), `i4_cost`, `i16_mode`, `i16_cost` and `i16_better`
   are then valid. The reconstruction can be read through `rec_rd_*`:
   word `4*blk + col`, with blk in coding order and row i in byte i. The
   plane predictors can be read through `pp_rd_*`, word `4y + w`. The
   next macroblock may be loaded at once.
4. **Bitstream.** A word appears on `bs_word` with `bs_valid`, and there
   is no back-pressure. After the last macroblock, wait for `bs_busy` to
   fall, then pulse `flush_req`. The last word is then emitted, with
   `bs_bits` giving its valid bit count.

Reset (`rst_n`) is asynchronous and active low. The memories are not
reset.

## Files

| file | unit |
|------|------|
| `rtl/intra_pkg.sv` | mode enum, transform select, pixel/coefficient types |
| `rtl/intra_coder_top.sv` | the coder: both pipeline stages and their control |
| `rtl/intra_pred_gen.sv` | four-PE predictor generator |
| `rtl/plane_setup.sv` | plane-mode parameters and seeds |
| `rtl/dbbh.sv` | neighbour-pixel registers |
| `rtl/transform_1d.sv`, `rtl/multi_transform.sv` | 1-D butterfly, 2-D engine |
| `rtl/quant_iq.sv` | quantizer / dequantizer |
| `rtl/mode_decision.sv` | Lagrangian cost and best-mode tracking |
| `rtl/dc_coef_regs.sv` | 16x16-candidate DC registers |
| `rtl/coef_buffer.sv`, `rtl/sp_sram.sv` | coefficient buffer, single-port SRAM |
| `rtl/cavlc_engine.sv`, `rtl/exp_golomb.sv`, `rtl/vlc_packer.sv` | entropy coding and packing |
| `tb/tb_<unit>.sv` | one self-checking bench per unit |
| `tb/intra_frame_harness.sv` | frame driver plus independent reference decoder |
| `tb/tb_intra_coder_top.sv` | end-to-end test, 96x64 frame |
| `tb/tb_intra_coder_sdtv.sv` | end-to-end test, one 720x480 frame |

## Verification

Every bench compares the unit with values it computes independently. Each
ends by printing `TB_RESULT checks=N failures=M` and includes a
watchdog.

The end-to-end benches work as follows:

* `intra_frame_harness` synthesises a picture with flat areas, gradients,
  stripes at several angles, edges and noise. It drives the coder one
  macroblock at a time and collects the bitstream.
* A separate behavioural H.264 decoder in the harness decodes that stream:
  header, CAVLC, dequantization, inverse transform and all nine 4x4
  predictions.
* The decoded modes and pixels must equal the hardware's reconstruction
  bit for bit.
* The plane predictors are checked against the plane formula.
* The chosen modes must use only available neighbours.
* Each macroblock must take at most 1300 cycles.
* The harness also counts how often each of these happens, and fails if
  any never occurs:
  * each of the nine modes
  * most-probable and remaining-mode codes
  * 16x16 reported better and worse
  * stage overlap
  * empty and full blocks
  * packer words
  * the final flush

Results:

* 96x64 frame: 11973 checks, mean absolute reconstruction error 0.67 at
  QP 16.
* Full 720x480 frame (all parameters at their defaults): 782977 checks,
  mean absolute error 2.69 at QP 28, about 2.3 s of simulation.

Run a bench with Verilator 5, for example:

```
verilator --binary -j 0 --top-module tb_intra_coder_top \
    rtl/intra_pkg.sv $(ls rtl/*.sv | grep -v intra_pkg) \
    tb/intra_frame_harness.sv tb/tb_intra_coder_top.sv
./obj_dir/Vtb_intra_coder_top
```

The package must come first. For a unit bench, list `rtl/intra_pkg.sv`,
the unit's file(s) and `tb/tb_<unit>.sv`. The benches build without
warnings at Verilator's default settings.

## Throughput

| workload | needed | this design |
|----------|--------|-------------|
| 720x480 30 Hz (1350 MB/frame) | 40500 MB/s x 1260 cycles (1189 + 71 load) = 51 MHz | fits at 54 MHz (luma) |
| 4096x4096 pixels per second (65536 MB/s) | 82.6 MHz | does not fit at 54 MHz: 11 Mpixel/s luma |
| 352x288 (396 MB/frame) | 0.50 Mcycles/frame | about 107 frames/s at 54 MHz |

The core has no frame-size limit, because it holds only one macroblock
plus its neighbours.
