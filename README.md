# Convolution Engine CMP in SystemVerilog

## The idea

Image and video kernels such as filters, SAD motion search, demosaicing and
feature detection all have the same shape. A small window (the stencil) slides
over a 2D array. At each position a *map* step combines every pixel with a
coefficient (multiply, absolute difference, compare, ...). Then a *reduce* step
folds the results into one value (sum, max, min, AND).

A general-purpose processor or a SIMD unit spends most of its energy moving
data between the register file and the ALUs. The Convolution Engine (CE)
avoids this in four ways:

- **Shift registers hold the data.** They keep the image in place: one new
  row or column enters while the stencil slides.
- **Interface units broadcast shifted copies.** They feed shifted copies of the
  registers to many ALUs at once, so one instruction computes several stencil
  positions.
- **The ALUs are simple.** There are 64 of them, 10 bits wide, two inputs each.
- **The reduction tree has taps.** Results can be taken after 4:1, 8:1, 16:1,
  32:1 or 64:1 reduction, giving 16, 8, 4, 2 or 1 results per cycle.

A small SIMD unit and a *complex graph fusion unit* (CGFU) handle the
remaining work. The SIMD unit works on rows of the output register. The CGFU
runs up to nine dependent, predicated operations per pixel in one instruction,
covering the irregular parts of a kernel.

Four such slices, a control interface per slice, two processor ports and
fixed-function blocks (a 4x4 Hadamard/SATD unit and a motion-vector cost table)
form the CE chip multiprocessor (CMP). The H.264 encoder units of the earlier
chapter are built beside it:

- the IME 16x16 SAD array with its four-direction shifting reference register;
- the FME 6-tap half-pixel up-sampler;
- the CABAC coefficient LIFO with zero flags;
- the CABAC unary/Exp-Golomb binarizer.

## What is built

Everything is in `rtl/`, one unit per file. `ce_cmp` is the top.

| File | What it does |
|---|---|
| `ce_pkg` | Sizes (10-bit data, 64 ALUs, 1x40 / 16x18 / 16x16 / 16x18 registers, 256-bit memory port), operation enums, instruction format |
| `ce_regfiles` | 1D shift register, 2D input shift register, coefficient register, output register (also the SIMD vector register file) |
| `ce_ldst` | Load/store unit: 64/128/256-bit, any byte address (one or two memory lines), 8- or 16-bit elements, even/odd interleaved loads |
| `ce_interface` | Horizontal, vertical and 2D interface units: 4/8/16-tap 1D, 4x4 and 8x8 2D, with offsets and tap mask |
| `ce_alu_array` | 64 two-input ALUs (map step) |
| `ce_reduce` | Tapped reduction tree (add, AND, max, min) with shift-and-saturate normalisation |
| `ce_simd` | 16-lane add/subtract-class SIMD unit on output-register rows |
| `ce_cgfu` | Data shuffle stage, Data Shuffle Register, two fusion arrays of nine predicated FUs, comparator and status register |
| `ce_slice` | One slice: instruction decode, two-stage compute pipeline, interlocks |
| `ce_ctrl_arb` | Per-slice control interface, round-robin between the two processor ports |
| `hadamard4x4` | 4x4 Hadamard transform and SATD of slice 1's residual |
| `mv_cost` | Motion-vector cost from a writable bit-count table |
| `ime_sad_array` | 16x16 SAD array; reference register shifts left/right/up/down |
| `fme_upsampler` | Six-tap half-pixel filters: row filters, six-entry column registers, column filters |
| `cabac_lifo` | 16-entry coefficient LIFO with zero flags |
| `cabac_binarizer` | Unary, truncated unary, Exp-Golomb (order k) and UEGk bin strings |
| `ce_cmp` | Top: four slices (CGFU in slices 0 and 1), arbiters, fixed-function blocks and the H.264 units |

### Timing

- **Compute instructions** (1D horizontal, 1D vertical, 2D) issue one per
  clock. The result is in the destination register two clocks after the
  instruction is accepted.
- **Loads and stores** take two clocks per memory line plus the memory's own
  latency. Memory uses a request/grant port with a separate read-valid.
- **Stalls.** A slice stalls its processor port while a load or store is in
  progress. It also stalls in two hazard cases:
  - a memory, SIMD or CGFU instruction follows a compute whose result is not
    yet written;
  - a vertical or 2D compute reads a 2D input register that the previous
    compute is about to write.

## Choices made where the description is silent

- **Instruction format.** The instruction format, the instruction encoding and
  the memory port protocol are this design's own.
- **Reduction edge cases.**
  - Masked lanes carry the identity of the reduce operation.
  - Normalisation is an arithmetic right shift followed by saturation to 10
    bits.
  - Reads beyond a register's edge give 0.
- **CGFU structure.** Each fusion array is a chain of nine FUs. Each FU can take
  its operands from the 16-entry Data Shuffle Register or from any earlier FU.
  FU operations:
  - add, subtract, absolute difference, min, max, rounded average, pass;
  - optional right shift by 0 to 3;
  - predication on the status bits A<B, A>B or A==B.

  A fusion reloads the status register only when asked to, so one decision can
  steer several following fusions. The document gives the parts (shuffle, DSR,
  fusion arrays, comparator, status register, "up to nine" operations) but not
  the exact network.
- **Fixed-function blocks.**
  - The motion-vector cost is λ·(T[|Δx|] + T[|Δy|]) with a 64-entry table.
  - The Hadamard block reads rows 0–3, columns 0–3 of slice 1's output
    register.
- **H.264 standard rules.** The rounding of the FME filters and the
  binarization rules follow the H.264 standard, which the description only
  refers to.
- **Per-block details.** Every file's opening comment says which parts follow
  the description and which are this design's choice.

## Not built

- **CABAC arithmetic coder and constant-time renormalisation (ENCODE_PIPE_5).**
  The LPS range table, the state transitions and the bit-level design of that
  instruction are not given.
- **Slice concatenation.** Two or four slices cannot be joined into one wider
  engine. This means:
  - a 16x16 2D stencil (256 ALUs) does not run;
  - the 15-tap filter example, printed for two slices with 128 ALUs, runs here
    on one slice with 64 ALUs, four outputs per instruction.
- **Outside parts.** The Tensilica processors, their caches, the memory system
  and the speech-recognition CMP are not built. The processor instruction
  ports and one memory port per slice are brought out of the top instead.
- **CGFU timing.** The CGFU computes a fusion in one cycle. The pipelining
  inside its fusion arrays is not modelled.

## Tests

Every unit has a self-checking testbench in `tb/`, each named `tb_<unit>`. Each
one ends with a line `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_ce_alu_array`, `tb_ce_reduce`, `tb_ce_simd`, `tb_ce_interface` | Random operands against a software model of the operation |
| `tb_ce_regfiles` | Every write port and every shift, against a model |
| `tb_ce_ldst` | Random widths, addresses (aligned, unaligned, line-crossing), element formats and interleave; the memory model stalls grants at random and has 1–3 cycle read latency |
| `tb_ce_cgfu` | Random shuffles and random FU programs against a model; a three-step demosaic green interpolation |
| `tb_ce_slice` | A shadow model of all registers and memory runs 150 random programs; also a sliding 16-tap filter, the one-per-clock issue rate and the two-clock latency |
| `tb_ce_ctrl_arb` | Instruction routing, round robin and a waiting bound |
| Fixed-function and H.264 units | Direct models: matrix product, table lookup, 6-tap filtering of an image, a bit-queue binarizer, a queue LIFO |

**End-to-end test.** `tb_ce_cmp` runs the whole CMP at its default size
(four slices, two ports). Both processor ports drive several slices at the same
time:

- a residual and SATD, through interleaved unaligned loads, copies, SIMD and
  the Hadamard block;
- a shuffle plus fusion;
- an 8-tap filter;
- a four-position 4x4 SAD;
- one use each of the MV cost, IME, FME, LIFO and binarizer units.

Stored results are compared with direct computations. The test also counts,
and requires to be non-zero: stalls, arbitration conflicts, two-line memory
accesses, interleaved loads, shuffles, fusions, SIMD, convolutions and every
fixed-function unit.

**Fault tests.** For each unit there is a copy with one deliberate bug. That
unit's testbench must fail against the copy.

## Running a testbench

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ce_pkg.sv tb/tb_ce_util_pkg.sv tb/tb_ce_slice.sv --top-module tb_ce_slice
./obj_dir/Vtb_ce_slice
```
