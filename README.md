# Convolution Engine

Most of the work in camera and video pipelines is stencil work. A small window slides over an image. Each pixel in the window is combined with a coefficient, and the results are folded into one number. Ordinary convolution is multiply-then-add. Motion-estimation SAD is abs-diff-then-add. An extremum test is compare-then-AND. This unit generalises the pattern as **map** (a per-element function of pixel and coefficient) followed by **reduce** (a fold of the mapped values). It runs the pattern on hardware built so that one memory load feeds hundreds of operations:

* the **stencil neighbourhood** sits in a 16 x 32 *shift register*. Sliding the window one pixel is a one-cycle rotate, and moving down one image row is a single row load.
* the **coefficients** (or, for SAD, the current block) sit in a 16 x 16 register. Every element of it is read in parallel.
* a **64-lane map unit** and a **reduction tree** consume both registers at once.

The unit is a specialised functional unit of a host processor. The processor's instructions load the registers, pick the map and reduce functions, issue convolve steps and store results. A 16-lane SIMD unit with an 18-entry vector register file takes element-wise results and post-processes them.

Everything is SystemVerilog-2017 in `rtl/`. Every block has a self-checking testbench in `tb/`.

## Block diagram

```
            host processor (instruction stream, not part of this RTL)
                   | instr_valid / instr (ce_instr_t) / instr_ready
                   v
              +---------+  configuration: map op, reduce op, stencil size
              | ce_ctrl |  pass sequencing, stalls
              +---------+
      load data |   | controls
   +------------+---+----------------------------------------------+
   v                v                                              v
coeff_reg2d     shift_reg2d                                     simd_rf (18 x 16 x 10b)
 16x16x10b       16x32x10b  <- shift-up load, rotate-left          |  ^
   \              /                                                v  |
    +-- operand_if (2D / column access) --+                    simd_alu (16 lanes)
                   | 64 (pixel, coeff) pairs + lane mask
                   v
              map_unit (64 ALUs) ------ lanes 0..15, clamped ------^  (matrix ops;
                   |                 lanes 0..15 also to out_reg,  full precision)
                   v
             reduce_unit (sum tree / logic AND, whole or 4 x 16)
                   v
              out_reg (16 x 32b, overwrite or accumulate)
                   v
               out_data (stores)
```

`conv_engine` is the top. It contains only this wiring, the mux that picks what is written to the SIMD register file, and the registered store port.

## The sliding window: how SAD motion search runs

This is the part that makes the design efficient. It is worth following once.

1. `SET_OPS(abs-diff, add)` and `SET_SIZE(16)`.
2. Sixteen `LD_COEFF` instructions put the 16 x 16 current macroblock into the coefficient register, one row each.
3. The 32 x 16 reference window goes into the shift register. For each image row, `LD_2D` with `shift=1, seg=0` moves every row up by one and writes pixels 0..15 into the bottom row. Then `LD_2D` with `shift=0, seg=1` writes pixels 16..31 into the same row.
4. Sixteen `CONV_2D(a=x, rotate=1)` steps follow. Each one computes the SAD between the coefficient register and columns 0..15 of the shift register and writes it to output entry x. Then every row rotates one column left, with column 0 wrapping to column 31. Step x therefore sees reference columns x..x+15.
5. `ST_OUT` delivers the 16 SADs of one search row.
6. After 16 rotates the two halves have swapped places. The next search row needs only **one** new image row, loaded with its halves swapped: pixels 16..31 to `seg 0` with shift, then pixels 0..15 to `seg 1`. Another 16 convolve steps follow.

In step 4 each window load yields 16 x 256 = 4096 abs-diff operations.

The 64 map lanes cover a 16 x 16 stencil in four **passes** of 4 rows x 16 columns. Pass 0 overwrites the output entry and passes 1-3 add to it. Together they take 4 cycles per `CONV_2D`. During the last three cycles the controller holds `instr_ready` low, which stalls the processor. A stencil of size S takes ceil(S/4) cycles, so a 4 x 4 SAD is one cycle with no stall.

## Map, reduce and data flows

The map functions (`map_unit`) work on an unsigned 10-bit pixel `a` and a 10-bit coefficient `b`:

| op | result | used for |
|---|---|---|
| `MAP_ABSDIFF` | \|a-b\| | motion-estimation SAD |
| `MAP_MUL` | a x b, with b as a signed two's-complement tap | filters (half-pixel 6-tap, Gaussian) |
| `MAP_AVG` | (a+b+1)>>1 | quarter-pixel interpolation |
| `MAP_SUB` | a-b | difference of Gaussians |
| `MAP_CMP` | 1 if a > b | extremum detection |
| `MAP_PASS` | a | moving data |

The reduce functions (`reduce_unit`) are `RED_ADD` (a summation tree), `RED_AND` (1 when every active lane is non-zero) and `RED_NONE` (element-wise result, no fold). Lanes outside the stencil are masked so that they do not change the result: they count as 0 for add and as true for AND. When a logic-AND reduce runs over several passes, the output register combines the passes by AND, not by addition.

The operand interface (`operand_if`) feeds the 64 lanes in one of four data flows. The instruction selects the flow:

| instruction | lanes | result |
|---|---|---|
| `CONV_2D` | rows 4p..4p+3 x columns 0..15 of both registers, for pass p | one value to `out[a]` |
| `CONV_1DH` | 4 horizontal stencils on shift rows b..b+3, with taps from coefficient row 0 | `out[a + 4g]` for g = 0..3, one cycle |
| `CONV_1DV` | 4 vertical stencils down shift columns b..b+3, with taps from coefficient row 0 | `out[a + 4g]`, one cycle |
| `CONV_MAT` | row b of both registers, 16 lanes | 16 mapped values: clamped to 0..1023 into SIMD entry a, and signed at full precision into `out[0..15]` |

Every convolve form can rotate the shift register left after it runs (`rotate=1`).

## Instruction set (`ce_pkg::ce_instr_t`)

| opcode | fields used | effect |
|---|---|---|
| `OP_SET_OPS` | `map_op`, `red_op` | select the map and reduce functions |
| `OP_SET_SIZE` | `size` (1..16) | stencil size (reset value 16) |
| `OP_LD_COEFF` | `a` (row), `data` | write one coefficient row |
| `OP_LD_2D` | `seg`, `shift`, `data` | write half of the shift register's bottom row, optionally after shifting up |
| `OP_CONV_2D` / `_1DH` / `_1DV` / `_MAT` | `a`, `b`, `rotate` | see the table above |
| `OP_ST_OUT` | | output register to `out_data` |
| `OP_LD_SIMD` | `a`, `data` | write a SIMD register |
| `OP_ST_SIMD` | `a` | SIMD register (zero-extended) to `out_data` |
| `OP_SIMD` | `simd_op`, `a` (dest), `b`, `c` | 16-lane op: saturating add, subtract floored at 0, abs-diff, rounded average, min, max |

`data` carries 16 pixels of 10 bits.

**Timing.** An instruction is accepted on a rising edge with `instr_valid && instr_ready`. Its first (or only) cycle executes in that same clock. Register writes land at that edge. A store's result appears on `out_data` with `out_valid` high in the following cycle. Only `OP_CONV_2D` with size > 4 takes more than one cycle; it deasserts `instr_ready` for ceil(size/4)-1 cycles. The reset (`rst_n`, asynchronous, active low) clears every register and sets the configuration to abs-diff, add, size 16.

## Where the design departs from the source or fills gaps

The following come from the source: the structure (two 2D registers, a 64-lane map unit, a flexible reduce, an output register, a 16-wide SIMD side) and its sizes (10-bit pixels, 16 x 16 coefficients, 16 x 32 shift register, 64 lanes, 16 output entries, 18 x 16 SIMD registers, 16 SIMD lanes). The list of map and reduce operations, the shift-up load and the wrapping rotate also come from it, as does the SAD sequence above.

The source is not fully consistent about two sizes. Its worked example draws a 16 x 32 shift register and a "64-lane" map unit. Its summary of the built engine lists one "16x16" 2D register and a "16-way" SIMD unit. This design follows the worked example: the 16 x 32 shift register is needed to search 16 positions, and the 16 x 16 register is the coefficient register. It treats the 16-way SIMD unit as a separate unit next to the 16-wide register file. If the built engine's map unit was in fact 16 lanes wide, `LANES` and the pass logic would change.

The rest is this design's own choice:

* **Instruction encoding and handshake.** The source describes roughly thirty processor instructions but shows only the SAD calls. The opcodes, their fields and the valid/ready stall are new here.
* **Operand routing.** The lane assignment of the 1D and matrix flows, the 4-pass split of 2D stencils, and 1D taps taken from coefficient row 0 are choices made here.
* **Arithmetic details.** These include signed coefficients for multiply, rounding up in averages, `a > b` for compare, 32-bit output entries, and clamping the register-file copy of matrix results to 10 bits. Negative difference-of-Gaussians values therefore survive only in the output-register copy.
* **SIMD operation set.** The source gives only the SIMD unit's width and register count.
* **Bottom load row.** The source's figures draw the row being loaded as a 17th row under the 16-row window. Here it is written directly into row 15 during the shift, which behaves the same way for the SAD sequence.
* **Load width.** Loads carry 16 pixels of 10 bits, 160 bits. The source names its loads `_128`, which suggests 8-bit pixels in memory widened to the engine's 10 bits.

Not built:

* the "complex" reduce that demosaicing needs (a multi-step reduce the source mentions without describing);
* the combining of several engine slices for stencils larger than 16 x 16;
* the host processor itself (instruction decode, pipeline, integer unit). Its instruction stream enters at the `instr` port.

## Verification

Each block has a testbench, `tb/tb_<module>.sv`. It drives random and corner-case stimulus, compares every output with a model written independently inside the testbench, and prints `TB_RESULT checks=N failures=M`. A watchdog ends a run that hangs.

`tb/tb_conv_engine.sv` runs the whole engine at its default sizes against an instruction-level reference model:

* the SAD sequence above, checked against SADs computed directly from the image, including that the best match is found at the planted offset;
* the one-row reload, and 4 x 4 and 9 x 9 stencils;
* a 6-tap half-pixel filter (taps 1, -5, 20, 20, -5, 1);
* 9, 13 and 15-tap vertical binomial filters;
* compare / logic-AND extremum tests in 1D and as multi-pass 2D;
* average and subtract matrix operations, including negative differences, and SIMD operations;
* 1500 random instructions.

It checks the cycle count of every 2D convolve (4 cycles for 16 x 16, 3 for 9 x 9, 1 for 4 x 4). It also counts how often each mechanism occurs: stall, shift-up load, rotate, accumulate pass, each data flow, clamp, AND true/false, each map and reduce op. A mechanism that never occurs is reported as a failure. The run takes well under a second.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ce_pkg.sv tb/tb_conv_engine.sv --top-module tb_conv_engine
./obj_dir/Vtb_conv_engine
```

Use the same command with another `tb_<module>` for a single block. Lint a module with `verilator --lint-only -Wall -Irtl -y rtl rtl/ce_pkg.sv rtl/<module>.sv`.

## Files

| file | contents |
|---|---|
| `rtl/ce_pkg.sv` | sizes, operation enums, instruction struct |
| `rtl/conv_engine.sv` | top |
| `rtl/ce_ctrl.sv` | instruction decode, pass sequencing, stall |
| `rtl/coeff_reg2d.sv`, `rtl/shift_reg2d.sv` | 2D registers |
| `rtl/operand_if.sv`, `rtl/map_unit.sv`, `rtl/reduce_unit.sv` | compute path |
| `rtl/out_reg.sv` | output register |
| `rtl/simd_rf.sv`, `rtl/simd_alu.sv` | SIMD side |

Sizes live in `ce_pkg`, and most modules also take them as parameters. Changing `LANES` or the register sizes in the package rescales the design. `operand_if` and `ce_ctrl` assume 64 lanes in 4 groups of 16 and 4 rows per pass. Those two need attention when the lane count changes.

Synthesis estimate (coarse, word-level): about 3100 cells and 11.8k flip-flop bits. The two 2D registers, the SIMD register file and the output register are flip-flop arrays, because every element is read in parallel.
