# All-intra HEVC encoder core in SystemVerilog

This is an HEVC (H.265) intra-only encoder core built as three stages. It
works on one 32x32 luma block, with its two 16x16 chroma blocks (4:2:0), at a
time:

1. **Early mode decision.** The coding-unit quad-tree (32, 16, 8 and 4
   samples) and one intra mode per unit are chosen before any reconstruction
   takes place. The decision uses original samples, not reconstructed ones.
   Every candidate unit and its neighbouring samples are subsampled to 4x4.
   All 35 intra modes are predicted on the 4x4 block by 19 parallel units
   (17 angular, planar and DC) in two passes of four rows each. Nineteen 4x4
   Hadamard units give the cost of each mode. A unit is split when its four
   children together cost less than the unit itself, with costs scaled to
   the unit's area.
2. **Reconstruction loop.** Each coding unit is coded as one transform block
   per plane. A block passes through these steps, one 4x4 sub-block per
   cycle:
   - intra prediction from line buffers: reference fetch, substitution of
     unavailable samples, smoothing filters including the strong 32x32
     filter, planar/DC/angular prediction, and edge post-filters;
   - forward transform: DCT for 4 to 32 samples, DST for 4x4 luma;
   - quantisation with sign data hiding, then dequantisation;
   - inverse transform;
   - reconstruction, which writes the reference samples back to the picture
     memory.
3. **Entropy coding.** Quantised levels go through these units in order:
   - a ping-pong coefficient memory;
   - a scan-order generator;
   - a residual syntax generator, which produces HEVC `residual_coding`
     elements with their context indices;
   - a binariser;
   - a CABAC arithmetic coder taking one bin per cycle;
   - an emulation-prevention unit that writes the payload bytes.

Parameters default to 1920x1080: `PIC_W = 1920` and `PIC_H = 1080`.

## Files

| File | Contents |
|---|---|
| `rtl/hevc_pkg.sv` | Shared types (`pix_t`, `blk4_t`, `cblk4_t`, `syn_elem_t`, `bin_t`). Also the HEVC tables as functions: angles, DCT/DST coefficients, quantiser scales, CABAC state tables and scans. |
| `rtl/hevc_encoder_top.sv` | Top level and controller. |
| `rtl/early_mode_decision.sv`, `emd_intra_pred.sv`, `emd_angular_unit.sv`, `hadamard4.sv`, `emd_select.sv` | Stage 1. |
| `rtl/picture_memory.sv`, `rec_intra_pred.sv`, `transform_2d.sv`, `dct_core.sv`, `dst4.sv`, `quantizer.sv`, `reconstruction.sv` | Stage 2. |
| `rtl/coeff_memory.sv`, `block_ordering.sv`, `coeff_syntax_gen.sv`, `binary_parser.sv`, `cabac_encoder.sv`, `emulation_preventer.sv` | Stage 3. |
| `tb/tb_*.sv` | Self-checking testbenches. Each ends with `TB_RESULT checks=N failures=M`. |

Each source file opens with a comment that describes the block's interface
and timing. It also separates what follows the encoder architecture from
what is this implementation's own choice.

## Top-level interface

- **Window load** (`win_we`, `win_row`, `win_col`, `win_data`): loads a 65x65
  window of original luma. Row 0 and column 0 hold the neighbouring samples.
- **Raw load** (`raw_we`, `raw_plane`, `raw_addr`, `raw_blk`): loads the
  original 4x4 units of all three planes. The address is
  `((y mod 32)/4)*8 + (x mod 32)/4`, in the plane's own sample coordinates.
- **Block control:** `ctu_x` and `ctu_y` give the block position in luma
  samples, and `qp` is the quantisation parameter. `start` encodes one
  block, and `done` pulses when the block has been reconstructed and coded.
  `finish` writes the end-of-slice bin and flushes the coder.
- **Outputs:**
  - `cu_*` lists the coding units that were decided;
  - `rec_*` shows every reconstructed 4x4 sub-block;
  - `bs_valid`, `bs_byte` and `bs_last` carry the bytes, with `bs_last` on
    the last byte of the slice.

## Timing

| Unit | Timing |
|---|---|
| Early-decision predictor | 8 cycles per 4x4 candidate. Costs are ready 4 cycles after the last row. |
| Reconstruction intra predictor | First sub-block N/2 + 10 cycles after start, then one sub-block per cycle. |
| Transform | 1 + (N/4)^2 cycles to load, then the passes, then (N/4)^2 cycles to output. |
| Quantiser | Latency of 2 cycles. |
| CABAC coder | Accepts one bin per cycle. Its bit writer emits one bit per cycle behind a 16-entry FIFO, and `bin_ready` drops when the FIFO is nearly full. |

The stages run one after another for each block. In the end-to-end test a
32x32 block takes between 4.9k and 8.7k cycles.

## Gaps and deviations

- **Throughput.** The budget for 1080p at 30 frames/s and 140 MHz is 2287
  cycles per block. The stages are not yet overlapped, so this core reaches
  roughly 8 to 14 frames/s at that clock.
- **No PU syntax.** Prediction-unit syntax (split flags, partition mode,
  intra mode coding) and its interleaving with the residual syntax are not
  built. The byte stream therefore carries residual syntax only and is not a
  decodable HEVC slice.
- **No headers.** Slice and parameter-set headers are not generated.
- **Sequential syntax generator.** The residual syntax generator handles
  one element per cycle. It is not a pipeline that takes one 4x4 group per
  cycle.
- **Context initialisation.** All CABAC contexts start from one
  initialisation value (154). The standard's per-element tables are not
  used.
- **Fixed coding choices.** Chroma uses the luma mode. There is one
  transform block per coding unit. Quantisation uses a flat scaling list and
  no rate-distortion optimisation. The input-picture fetch from external
  memory is left to the user of the top level.

## Running

Every testbench runs under Verilator 5 (`--binary --timing`) with `rtl/` and
`tb/` as library directories. `tb_hevc_encoder_top` runs the top at its
default 1920x1080 parameters.
