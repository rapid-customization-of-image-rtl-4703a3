# A customizable image processor with blur and bilateral-grid custom operations

Image kernels such as blurs do little control flow and a lot of the same small
arithmetic on 8-bit pixels. Rather than buying a generic processor, one can build a
small programmable processor and add a few *custom operations*: single
instructions that replace a chain of basic operations in the kernel's hot spot.
This RTL is such a processor. It is a transport-triggered architecture (TTA): the
program does not name operations on registers. It names *data moves* between
function-unit ports, and writing a unit's trigger port starts that unit's
operation. Adding a custom operation therefore means adding one more function
unit with its own ports on the move buses.

The processor has the basic units of a small scalar machine: an integer ALU, a
load-store unit with data memory, scalar and boolean register files, and a
real-time-clock cycle counter. Three custom operations come from two image
applications:

| unit | operation | latency |
|---|---|---|
| `wavg3_fu` | `(p0 + 2·p1 + p2) / 4` on 8-bit pixels: one tap of a 3×3 blur | 1 cycle |
| `swavg5_fu` | float `x0 + 4·x1 + 6·x2 + 4·x3 + x4`, the blur of a bilateral grid, not normalised | 5 cycles |
| `lerp3d_fu` | float trilinear interpolation of 8 grid voxels with weights wx, wy, wz | 15 cycles |
| `fpu_fu` | float ADDF, SUBF, MULF, DIVF, int→float CIF, float→int CFI | 3 cycles |

The design follows the paper "Rapid Customization of Image Processors Using
Halide". That paper describes a compiler flow that maps Halide programs to such
processors, and it evaluates two machines. The first is a blur machine: the basic
units plus `wavg3`. The second is a bilateral-grid machine: the same units plus a
floating point unit and the two float operations. This core holds the union of
both machines. The paper fixes a few things:

- which units each machine has;
- the formula, operand width and 1-cycle latency of `wavg3`;
- the input count, the missing division and the 5-cycle latency of the
  semi-weighted average;
- the 8 + 3 inputs and the 15-cycle latency of the 3D lerp;
- the 100 MHz clock at which cycle counts were turned into times.

Everything else in this design is its own choice, as the sections below note: the
instruction format, bus count, port protocol, memory sizes, ALU and FPU operation
sets, the float model, and the swavg5 weights.

## How the processor executes: moves, triggers and latencies

This is the part that matters most when writing or reading a program for the
core.

Each cycle the control unit (`gcu`) issues one instruction from the instruction
memory. The instruction has `NBUS = 3` move slots. Each slot holds a guard, a
source socket, a destination socket and a 22-bit signed immediate:

```
move_t  = { guard[1:0], src[6:0], dst[6:0], imm[21:0] }   38 bits
instr_t = move_t [2:0]                                      114 bits (slot 0 in the low bits)
```

- **Sources** are the registers, the FU result ports, or `S_IMM` = 127 (the slot's
  own immediate, sign-extended).
- **Guards**: `G_ALWAYS`, `G_B0` (execute only if boolean register B0 is 1), `G_NB0`
  (execute only if B0 is 0) and `G_NEVER` (empty slot). An empty slot can also be
  written as destination `D_NONE` = 127.
- **All moves of an instruction read their sources first**, then all destinations
  are written at the clock edge. A value moved into a register is visible to the
  next instruction.
- **FU ports.** Port 1 of every function unit is its *trigger*. A move to the
  trigger starts the operation, and the moved value is operand 1. Ports 2…n are
  *operand registers*: they keep their value until written again. An operand
  written in the same instruction as the trigger is used at once. This makes
  `{O2 <- a, O3 <- b, T <- c}` a complete 3-input operation in one instruction.
- **Opcodes are part of the destination.** The ALU, LSU and FPU each have one
  trigger address per opcode. For example, `D_ALU_T + ALU_SUB` computes
  `trigger − O2`.
- **Result ports are registers.** A result becomes readable exactly *latency*
  cycles after the trigger instruction, and it stays until the unit's next result
  arrives. The multi-cycle units (FPU, swavg5, lerp3d) are fully pipelined: a new
  operation may start every cycle, and results arrive in order.
- **Nothing is interlocked.** The program, which is statically scheduled, must not
  read a result port earlier than the latency allows. Reading early returns the
  previous result. This is the contract of a statically scheduled TTA, and the
  end-to-end bench depends on it: it reads every float result at exactly its
  latency.
- **Control.** A move to `D_JUMP` sets the next program counter. There are no delay
  slots, so jumps are conditional through guards. A move to `D_HALT` stops the
  core after the current instruction and latches the moved value in `exit_code`.
- **Illegal programs.** Two enabled moves to the same destination in one
  instruction are a program error, and an assertion reports it.

### Socket map (`rtl/tta_pkg.sv`)

| source | id | destination | id |
|---|---|---|---|
| r0–r15 | 0–15 | r0–r15 | 0–15 |
| B0, B1 | 16, 17 | B0, B1 (bit 0 of the value) | 16, 17 |
| ALU result | 18 | ALU O2 / trigger+op (ADD SUB AND IOR XOR SHL SHR SHRU EQ GT GTU) | 18 / 19–29 |
| LSU result | 19 | LSU O2 (store data) / trigger+op (LDW LDQU STW STQ), byte address | 30 / 31–34 |
| RTC count | 20 | RTC load | 35 |
| wavg3 result | 21 | wavg3 O2 (p1), O3 (p2), trigger (p0) | 36, 37, 38 |
| FPU result | 22 | FPU O2 / trigger+op (ADDF SUBF MULF CIF CFI DIVF) | 39 / 40–45 |
| swavg5 result | 23 | swavg5 O2–O5 (x1–x4), trigger (x0) | 46–49, 50 |
| lerp3d result | 24 | lerp3d O2–O11 (v100 v010 v110 v001 v101 v011 v111 wx wy wz), trigger (v000) | 51–60, 61 |
| immediate | 127 | jump, halt, none | 62, 63, 127 |

### Example: one blur output pixel

The end-to-end bench (`tb/blur_bench.sv`) contains a hand-scheduled blur kernel.
It computes the separable 3×3 blur used by the benchmark: a horizontal `wavg3` on
each of three rows, then a vertical `wavg3` on the three results. The core of it:

```
{ O2 <- r5, O3 <- r6, T <- r4 }          // h0 = wavg3(row 0)
{ r13 <- WAVG3, O2 <- r8, O3 <- r9 }     // read h0, set up row 1
{ T <- r7 }
{ r14 <- WAVG3, O2 <- r11, O3 <- r12 }
{ T <- r10 }
{ O3 <- WAVG3, O2 <- r14, T <- r13 }     // vertical: wavg3(h0, h1, h2)
{ LSU.O2 <- WAVG3, LSU.STQ <- r1 }       // store the output pixel
```

With the window loads and loop control, the kernel takes about 32.6 cycles per
output pixel. One 512×512 plane, producing the 510×510 plane without border
handling, takes 8,325,752 cycles. That is 83 ms at 100 MHz. The paper reports
50 ms per channel for this case, using code scheduled by an optimizing compiler on
its own machine. The hand schedule here does not overlap loads across pixels.

## Function units

- **`wavg3_fu`** keeps the sum `p0 + 2·p1 + p2` in 10 bits, so no intermediate
  overflow is possible. It divides by 4 with a fixed right shift by two, which
  truncates. Only the low 8 bits of each input are used, and the result is
  zero-extended.
- **`swavg5_fu`** is a five-register pipeline:
  1. multiply x1, x2, x3 by 4, 6, 4;
  2. add `x0 + 4x1` and `6x2 + 4x3`;
  3. add the two sums;
  4. add x4;
  5. result register.

  The weights are parameters (`W1`–`W3`). The defaults 1-4-6-4-1 are the binomial
  blur of the bilateral grid application. They are this design's reading, because
  the paper only says the inputs are "multiplied with weights and summed".
- **`lerp3d_fu`** computes `lerp(a,b,w) = a + (b−a)·w`, first along x (4 lerps),
  then y (2), then z (1). Each level is three stages: subtract, multiply, add.
  After the 9 arithmetic stages come `LATENCY − 10` delay stages and the result
  register, for 15 cycles in total. Weights 0 and 1 return a corner voxel exactly.
- **`fpu_fu`** computes in the trigger cycle, then passes the result through
  `LATENCY` registers. DIVF is there because the bilateral grid divides its
  interpolated value by its interpolated weight. It is a combinational
  restoring divider, so it is the unit's longest path.
- **`alu_fu`**: 32-bit operations. Comparisons return 0 or 1. Move the result to B0
  to use it as a guard. Shift amounts use the low 5 bits of O2.
- **`lsu_fu`**: byte-addressed, little-endian. Word accesses ignore the two low
  address bits. The memory is single-ported with byte enables and a registered
  read, giving latency 1. A host port shares the memory, so the host may use it
  only while the core is stopped (an assertion checks this). A host read also
  replaces the LSU's last load result.
- **`rtc_fu`**: a free-running 32-bit cycle counter. A move to its load port sets
  it. A value v written in cycle t reads as v + k in cycle t + k, so "load 0 …
  read" gives the elapsed cycle count.
- **`scalar_rf`** (16 × 32) and **`bool_rf`** (2 × 1): every bus may read and write
  any register. If two buses write the same register, the higher-numbered bus
  wins.
- **`gcu`**: the instruction memory (`IMEM_DEPTH = 1024`, read asynchronously),
  the program counter, start, jump and halt.

### Floating point model (`rtl/fp32_pkg.sv`)

All float units use IEEE single precision with round-to-nearest-even. The
functions `fp_add`, `fp_sub`, `fp_mul`, `fp_div`, `fp_from_int` and `fp_to_int` are
combinational and synthesizable. Subnormal inputs count as zero, and results
below the normal range are flushed to signed zero. Overflow gives infinity. NaN
and infinity propagate, but NaN payloads are not kept. For normal numbers the
results are bit-exact with IEEE arithmetic. The testbenches check this against
an independent model that uses the simulator's double-precision arithmetic.

## Using the core

Top module `halide_tta_proc` has these parameters:

| parameter | default |
|---|---|
| `IMEM_DEPTH` | 1024 |
| `DMEM_BYTES` | 2 MiB |
| `NREGS` | 16 |
| `FPU_LATENCY` | 3 |
| `LERP_LATENCY` | 15 |

The default memory holds the three colour planes of a 512×512 input and output
image. To run a program:

1. With the core stopped, write the program with `prog_we / prog_addr /
   prog_data`.
2. Write the data with `host_en / host_we / host_addr` (a word address) and
   `host_wdata`.
3. Pulse `start`. Execution begins at address 0, and `running` is high until a
   halt move.
4. Wait for `done`, then read the results on `host_rdata`, one cycle after each
   read request.

`tb/tta_asm_pkg.sv` has small helpers for writing programs: `mv(src, dst,
guard)`, `im(value, dst, guard)` and `ins(m0, m1, m2)`.

Reset `rst_n` is asynchronous and active low. It clears all registers,
pipelines and the program counter, but not the two memories.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
values computed in the testbench and ends with a line
`TB_RESULT checks=N failures=M`.

- **Units.** The float unit benches issue hundreds of random operations, back to
  back and with gaps. They compare the result port in *every* cycle against a
  model that schedules each result at its latency, so they check both the value
  and the exact latency.
- **`tb_halide_tta_proc`** runs the whole core at its default parameters:
  - it loads the blur program and a float section, blurs a 16×12 plane and
    checks every output pixel;
  - it checks the RTC-measured cycle count against the cycles it counted itself;
  - it runs lerp3d, swavg5 and all six FPU operations through the buses and
    checks their results;
  - it counts taken and guard-squashed jumps, squashed moves, operand bypasses in
    the trigger cycle, and every unit and opcode. A mechanism that never happens
    counts as a failure.
- **`tb_halide_tta_proc_full`** runs the same program on a full 512×512 plane.
  That is 260,100 output pixels and 8.3 M cycles, about 11 s in Verilator.
- **`tb_blur_clamped`** runs the clamp-to-edge blur on a full 512×512 plane (512×512
  output). Neighbours outside the image are replaced by edge pixels with ALU
  compares and guarded moves. It takes 7,608,322 cycles, about 29 cycles per pixel.
  That is 76 ms at 100 MHz; the paper reports 147 ms for its accelerated version.
- **`tb_bilateral_grid`** (program in `tb/grid_bench.sv`) runs the bilateral grid
  on a 256×256 float image with an edge, at the core's default parameters. It has three
  kernels, each timed with the RTC:
  1. a histogram into a two-channel grid (value sum and weight), using the FPU;
  2. three blur passes along z, x and y, using `swavg5`;
  3. slicing with two `lerp3d` operations per pixel, then a DIVF normalisation.

  The bench checks both grids and every output pixel bit for bit against its
  own model, and checks that the edge survives the filter. The program is 353
  instructions. The kernels take 3,868,176, 13,227,772 and 10,225,154 cycles:
  27.3 M cycles in total, 273 ms at 100 MHz, about 40 s in Verilator. The paper
  reports 181 ms with both custom operations, for its compiled version of the
  Halide program (see below).

To run a testbench with plain Verilator, pass the packages first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/tta_pkg.sv rtl/fp32_pkg.sv tb/tb_fp_pkg.sv tb/tta_asm_pkg.sv \
  tb/tb_halide_tta_proc.sv --top-module tb_halide_tta_proc
./obj_dir/Vtb_halide_tta_proc
```

## What is not here, and where the design departs from the paper

- **The processors in the paper are generated by a processor design toolset.**
  Their exact bus structure, port latencies, instruction encoding and jump delay
  slots are not given. This core's versions are simple stand-ins. Programs
  compiled for the original machines will not run on it.
- **No compiler.** The Halide → OpenCL → compiler flow is software and is not part
  of this RTL. The test programs are scheduled by hand.
- **One core for both machines.** The blur machine and the bilateral-grid machine
  are merged into one core. To get the smaller blur machine, remove the float
  units and their sockets. The unaccelerated baseline machines are not built.
- **The bilateral grid program is simplified** compared with the Halide example
  the paper ran:
  - grid cells start at multiples of 8 pixels, with no half-cell offset;
  - the grid has two cells of padding on each side instead of clamped reads;
  - each blur pass runs over the whole linear grid array, so cells at the array
    ends mix unrelated neighbours (slicing never reads them);
  - the histogram is one kernel here, while the paper's compiled pipeline has
    separate kernels (its first two use no custom operation).

  The per-kernel times can therefore not be compared with the paper's. The
  sizes s_sigma = 8 and r_sigma = 0.1 are those of the Halide example, not
  from the paper.
- **No unaccelerated runs.** The speedups the paper reports (1.63× and 1.18× for the
  blur, 1.22× for the bilateral grid) compare against machines without the custom
  units. Those machines and programs are not built, so the speedups are not
  reproduced.
- **`wavg3` rounding.** The paper's equation divides by 4 with a shift. Whether
  the fraction is truncated or rounded is not stated; this design truncates.
