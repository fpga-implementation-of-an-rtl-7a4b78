# IMSE object detection accelerator: Viola-Jones window evaluation on an AMBA bus

Viola-Jones face detection slides a search window over an image at many positions
and scales, and for every window runs a cascade of boosted classifiers built from
Haar-like rectangle features. Hundreds of thousands of windows per image, each
needing many memory reads, multiplications and a square root, make the window
evaluation the bottleneck on a small embedded processor. This design moves exactly
that step into hardware. It is an IP core for a LEON3 (SPARC V8) system on chip
built around AMBA buses. Software on the CPU keeps the flexible parts: colour
conversion, histogram equalisation, integral images, the scan over positions and
scales, and grouping of detections. For each window the CPU writes a few
registers and gives a start command. The core evaluates the whole cascade on its
own and answers "face" or "no face" with an interrupt.

The core is designed for resource sharing. When it is not detecting faces, in
"free mode", the CPU can use its 41x33 multiplier through registers and its 64 KB
shared memory as ordinary RAM.

## How a window is evaluated

The core uses the "scale the classifier" method. The image is never resized.
The integral image `ii` (each entry holds the sum of all pixels above and to
the left) and the squared integral image `sq` are computed once by software.
Only the classifier's rectangles are scaled, to match a window of W x H pixels.
A rectangle's pixel sum then always costs four reads. With corners ii1
(top-left), ii2 (top-right), ii3 (bottom-left) and ii4 (bottom-right):

    area = ii4 + ii1 - (ii2 + ii3)

**Variance normalisation.** Classic Viola-Jones divides every feature value by
the window's standard deviation σ and by its area. Instead, the core computes
one *adjusted* deviation per window:

    S1 = Σx over the window,  S2 = Σx² over the window
    σ_adj = sqrt(W·H·S2 − S1²)          (= W·H·σ)

Because σ_adj already contains the factor W·H, the raw feature sums can be
compared with `threshold · σ_adj` directly. Nothing is divided, and the feature
weights stay the same at every scale. This costs two multiplications and one
64-bit square root per window. If σ_adj is 0 it is replaced by 1.

**Features.** A feature has up to three rectangles (x, y, w, h in the 20x20
training window) with small signed weights. For the current scale s (Q16.16),
each coordinate is scaled and rounded on its own, offset by the window origin,
and turned into four corner addresses. Then:

    F = Σ area_i · weight_i
    T = (threshold · σ_adj) >>> 12         (threshold is signed Q.12)
    stage_sum += (F >= T) ? Weight2 : Weight1

**Stages.** After a stage's last feature, the window is rejected if `stage_sum <
stage_threshold`. Otherwise the next stage follows. A window that passes the last
stage (End_Stage_number) is a face. Most windows fail in the first stages after a
few features, and that is where the cascade saves its time.

## Block structure

| Module | Role |
|---|---|
| `imse_object_detection` | Top: wires everything and brings out the APB slave, AHB slave (shared memory), AHB master and `irq` |
| `apb_slave_if` | APB 2.0 slave. Register index = `paddr[5:2]`. Read data is registered in the setup cycle; the write strobe comes in the access cycle |
| `imse_register_bank` | The 16 registers (map below) |
| `imse_control_logic` | Start gating, free/detection mode, multiplier sharing, interrupt |
| `imse_stage_evaluator_unit` | The engine described above: main sequencer plus a corner-fetch state machine |
| `haar_feature_scaler` | 4-stage pipeline: coordinate × scale, rounding and window offset, row × stride, corner addresses |
| `haar_feature_rect_calc` | `ii4 + ii1 − ii2 − ii3`, one register stage |
| `sqrt64_array_pipe16` | 64-bit integer square root, 16 pipeline stages of two root bits each, latency 16 |
| `mul41x33signed` | 41 x 33 signed multiplier, 1 register stage |
| `ahb_master_if` | DMA master: single 32-bit AHB reads with bus request/grant and any number of wait states |
| `ahb_dpram` + `dpram` | 64 KB shared memory. AHB slave port for the CPU, read-only port for the evaluator |
| `imse_pkg` | Register map, bit layouts, structs |

The evaluator has two state machines because the AHB latency is unknown. The main
sequencer walks the phases:
window check → window sum → window square sum → two multiplications → square
root → for each stage: header → for each feature: record → for each rectangle:
scale → fetch → area → weight multiply → threshold multiply → stage decision.
The fetch machine issues the 4 reads of a rectangle (8 for the 64-bit square-sum
entries) one after another and waits for each response. It signals the sequencer
when all corners are in. The single multiplier serves every product:
W·H·S2, S1², area·weight and threshold·σ_adj.

## Programming model

Registers (32-bit, byte offset = 4 × index from the APB base):

| # | Name | Contents |
|---|---|---|
| 0 | Status | bit0 done (write 1 to clear), bit1 face, bit2 busy, bit3 error, bits 15:8 last stage evaluated |
| 1 | Config | bit0 mode (1 = face detection, 0 = free), bit1 start (write 1, reads 0), bit2 irq enable |
| 2 | Scale | feature scale, unsigned Q16.16 |
| 3 | Coordinates_XY | {y[31:16], x[15:0]} window origin |
| 4 | Address_Sum | byte address of the integral image (32-bit entries) |
| 5 | Address_SqSum | byte address of the squared integral image (64-bit entries, high word first) |
| 6 | Image_Dimension | {height, width} in pixels; windows must lie inside |
| 7 | Start_Node_and_Stage | bits 15:0 byte offset of the first stage in shared memory, bits 23:16 its stage number |
| 8, 9 | MUL_OP1, MUL_OP2 | free-mode signed 32-bit operands |
| 10, 11 | MUL_Result_LOW/HIGH | free-mode 64-bit product (read-only) |
| 12 | End_Stage_number | number of the last stage to evaluate |
| 13 | Search_Window_WH | W·H of the window |
| 14 | Search_Window_dimension | {H, W} of the window (software writes round(20·scale)) |
| 15 | Img_Width | integral image row length in entries (image width + 1) |

Both integral images have a zero first row and column, so they have
(width+1) x (height+1) entries.

Shared memory layout, in big-endian 32-bit words. Each stage is a two-word
header: the number of features, then the stage threshold (signed Q.12). Its
features follow, 6 words (24 bytes) each:

    word 0..2  rectangle: {weight[31:24] signed, x[23:18], y[17:12], w[11:6], h[5:0]}
               (weight 0 = rectangle unused)
    word 3     feature threshold, signed Q.12
    word 4     Weight1 (added when F < T), signed Q.12
    word 5     Weight2 (added when F >= T), signed Q.12

A detection run from the host's side looks like this:

1. Load the cascade into the shared memory once.
2. Write registers 2 to 7 and 12 to 15.
3. Write Config = 0b111.
4. Wait for `irq`, or poll Status.done.
5. Read Status.
6. Write 1 to Status bit 0.

The start command acts one clock after the Config write. A start in free mode
or while busy is ignored. If the mode is switched to free during an evaluation,
the evaluator keeps the multiplier until it has finished.

In free mode the multiplier runs every clock on MUL_OP1 x MUL_OP2. The product
can be read from the second clock after the operand write.

## Timing and capacity

Everything runs on one clock (80 MHz in the original system). Fixed latencies:
- scaler: 4 cycles
- rectangle calculator: 1 cycle
- multiplier: 1 cycle
- square root: 16 cycles
- shared-memory reads: 1 cycle
- AHB slave: writes with no wait state, reads with one

The evaluation time is set by the AHB reads: four reads per rectangle, one
at a time. The full-size testbench uses a VGA image, a 22-stage / 2135-feature
cascade and a system memory with random 0–3 cycle grant delays and 1–3 wait
states. There, a window that passes all 22 stages takes about 253,000 cycles
(3.2 ms at 80 MHz). Windows rejected in stage 1 take about 2,500 cycles.

Capacity:
- **Cascade:** 24 bytes per feature, so the 64 KB shared memory holds 2730
  features. The 22-stage, 2135-feature OpenCV frontal-face cascade needs 51,416
  bytes. Longer cascades can be run in pieces: Start_Node_and_Stage and
  End_Stage_number select the part that is currently loaded.
- **Image size:** The datapath widths allow images smaller than 1024 x 1024.
  The window sum needs at most 28 bits and the window square sum at most 37 bits
  (within the 41-bit operand). W·H·S2 stays below 2^63.

## What follows the original design and what is this implementation's own

These parts follow the original design:
- the split into APB slave, register bank, IMSE control logic, stage evaluator
  (with rectangle calculator, pipelined scaler, 16-cycle 64-bit square root,
  41x33 signed multiplier), AHB DMA master and 64 KB dual-port AHB shared memory
- the sixteen register names and their order
- free and face-detection modes
- the interrupt at the end of a detection
- the "scale the classifier" method with unscaled weights and the adjusted
  variance
- the rectangle formula and the per-feature Weight1/Weight2 rule

The original gives no internals for the following, so each is a choice made
here:
- all register bit layouts
- the compressed feature format (chosen as 24 bytes, which gives the stated
  capacity of about 2730 features)
- the Q16.16 scale and Q.12 thresholds
- integral-image entry sizes
- the rounding of scaled coordinates
- the variance taken over the whole window
- the tie rule (F = T gives Weight2)
- the stage rule (pass when stage_sum ≥ threshold)
- the error bit (window outside the image, or an AHB ERROR response)
- pipeline depths other than the square root's
- big-endian byte lanes
- single-word AHB reads
- the start, mode-switch and interrupt rules above

Where the original's two printed forms of the adjusted variance disagree, this
design uses `W·H·S2 − S1²`, the form whose square root equals W·H·σ.

Not included: the LEON3 processor, the AHB/APB bus infrastructure and arbiter,
the DDR2 controller and the other SoC peripherals. The top module brings out
the ports where they would connect.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Shared testbench code:
- `tb_vj_ref_pkg.sv`: a reference model. It builds the test image, the integral
  images and a random cascade, and computes the expected decision with its own
  arithmetic.
- `tb_ahb_slave_model.sv`: a behavioural arbiter and system memory.

Example, the end-to-end test at default sizes (about 20 s):

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/imse_pkg.sv tb/tb_vj_ref_pkg.sv tb/tb_imse_object_detection.sv \
        --top-module tb_imse_object_detection -o sim
    ./obj_dir/sim

This end-to-end test:
- loads the 2135-feature cascade over AHB
- checks free-mode products and an ignored free-mode start
- evaluates a window tuned to pass all 22 stages, plus random windows at random
  scales, against the reference model
- switches mode during an evaluation
- provokes both error cases

It counts each of these mechanisms and fails if one never occurs. Other
testbenches run the same way with their own file and top module name.

`tb_vga_scan_setups.sv` runs four scan set-ups on the VGA image: minimum
window 30x30 or 20x20, with scale step 1.2 or 1.1. It visits every scale of
each set-up, and at each scale it evaluates three random windows and checks them
against the reference model. It prints the number of scales, the number of
windows in a full scan (position step max(2, round(scale))), and the cycles per
window. The set-ups have 16, 30, 18 and 34 scales, and 304,385 to 866,196
windows per full scan. The cycle counts come from the random test cascade, so
they do not predict detection time with a trained cascade.

How far it can be trusted:
- Every block's results match an independent model in simulation, and each
  testbench was shown to catch a deliberately broken copy of its block.
- The cascade used in testing is random, because no trained classifier is
  included. The decision logic is therefore verified, but detection accuracy on
  real faces is not.
- No FPGA run has been made.
