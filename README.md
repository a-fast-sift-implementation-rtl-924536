# SIMD pixel processor for difference-of-Gaussian scale space

The first stage of SIFT feature detection builds a scale space. It blurs
the image again and again, subtracts neighbouring blur levels
(difference of Gaussian, DoG), and looks for pixels that are larger or smaller
than all 26 of their neighbours in space and scale. That stage takes most of the
run time of SIFT. The work is the same for every pixel and needs only nearby
pixels, so it maps naturally onto a focal-plane SIMD array. Each processing
element (PE) sits under a small patch of the image sensor and owns that patch's
pixels. All PEs run the same instruction in the same cycle, and they trade
border pixels with their four neighbours.

This repository holds synthesizable SystemVerilog for such a processor:

* an **array control unit (ACU)** that stores the program and issues one
  instruction per cycle;
* a **torus-connected array of PEs**, 64 x 64 = 4,096 by default. Each PE owns
  a 4 x 4 pixel block, so the array holds a 256 x 256 image.

It also holds testbenches that run the DoG stage on the array and check it
against a golden model. The block structure follows a published SIFT-on-SIMD
design: ACU, PE units, torus network, SAMPLE instruction, and the sizes listed
below. The instruction encoding, the timing and the internal wiring were
chosen for this RTL, because the original description stops at block level.

## Top level: `simd_top`

```
             prog_we/addr/data, start         busy, done
                     |                           ^
                 +---v---------------------------+---+
                 |  ACU: program memory, pc,         |
                 |  16 scalar registers              |
                 +---------------+-------------------+
                                 | bcast_valid, bcast_instr (registered)
              +------------------v-------------------+
   det_in --->|  pe_array: ROWS x COLS PEs on a torus |---> sp_out, sp_valid, active
 (8-bit/px)   +---------------------------------------+
```

| Parameter    | Default | Origin |
|--------------|---------|--------|
| `ROWS`, `COLS` | 64, 64 | 4,096 PEs as published; the square shape is this design's choice |
| `NPIX`       | 16      | 4 x 4 pixels per PE, as published |
| `MEM_WORDS`  | 256     | 256 x 32-bit local memory per PE, as published |
| `PROG_DEPTH` | 8192    | own choice |

To use it, write the program one word per cycle through
`prog_we`/`prog_addr`/`prog_data`, pulse `start`, and wait for `done`. The
image comes in on `det_in`. This is one 8-bit value per detector:
`det_in[r*COLS+c][(y%4)*4 + x%4]` holds image pixel (y, x), where
r = y/4 and c = x/4. The detectors and their 8-bit sigma-delta converters are
analog and are not modelled. Results come out of each PE's SP output register
on `sp_out`.

## Execution model

The ACU runs one instruction per clock cycle, and nothing stalls:

* A **scalar** instruction (`SLI`, `SADDI`, `SBNZ`, `HALT`) runs in the ACU.
  These instructions count loops and branch. During that cycle the array
  receives a NOP.
* A **vector** instruction goes to the broadcast register. Every PE executes
  it in the next cycle.

So a program of V vector and S scalar executed instructions takes exactly
V + S cycles from start to `done`. The testbenches check this count.

Each PE finishes any vector instruction in a single cycle. Register reads,
local memory reads and the neighbour transfer are combinational. The register
file, memory, accumulator, activity flag and SP register are written on the
next rising edge. No PE instruction has a hazard, because each result is
written before the next instruction reads it.

## Instruction set

Each instruction is a 32-bit word: `op[31:26] rd[25:22] ra[21:18] rb[17:14] imm[13:0]`.
The immediate `imm` is sign-extended. The opcodes fall into the five vector
classes of the original performance breakdown, plus the scalar class:

| Class | Instruction | Effect (per active PE unless noted) |
|-------|-------------|-------------------------------------|
| ALU | `ADD SUB AND OR XOR` | rd = ra op rb |
| | `ADDI`, `LI` | rd = ra + imm, rd = imm |
| | `SHL SHRA SHRL` | barrel shift of ra by imm[4:0] |
| | `MUL`, `MAC` | acc = ra[15:0] * rb[15:0] (signed), or acc += that product; rd = new acc |
| MEM | `LD`, `ST` | rd = mem[ra + imm]; mem[ra + imm] = rb |
| COMM | `COMM rd, ra, dir` | **every** PE sends ra; rd = the value sent by the neighbour in direction dir (0 N, 1 E, 2 S, 3 W) |
| MASK | `WAKE` | active = 1 (all PEs) |
| | `MGTZ MLTZ MEQZ` | active &= (ra > 0 / < 0 / == 0) (all PEs) |
| | `MINV` | active = !active (all PEs) |
| PIXEL | `SAMPLE` | all PEs latch their detectors at once |
| | `PIX rd, idx` | rd = held pixel idx (8-bit index, up to 16 x 16 detectors) |
| | `OUT ra` | SP output register = ra |
| scalar | `SLI SADDI SBNZ HALT` | s[rd] = imm; s[rd] += imm; if s[ra] != 0 then pc = imm; stop |

The exact opcode numbers are in `rtl/simd_pkg.sv`.

### Activity masking

Data-dependent work on a SIMD array is done by switching PEs off, not by
branching. An inactive ("sleeping") PE ignores every instruction that writes
state: it does not write its registers, memory, accumulator or SP register.
It still carries out three kinds of instruction:

* MASK instructions, so that it can be woken again;
* `SAMPLE`;
* `COMM`: it still sends its register ra, so active neighbours can receive
  from it.

A sequence of `MGTZ` instructions forms the AND of several tests. In the
workload below, 26 comparisons switch off every PE whose pixel is not a
maximum. Only the PEs still active then store the mark.

### Torus transfers

A `COMM` moves one word one hop, and every PE moves its word in the same
direction in the same cycle. Opposite array edges are joined, so PEs on the
edge receive from the far side. An image processed on the array therefore
wraps around at its borders.

## The DoG workload

The program lives in `tb/sift_prog_pkg.sv`. Testbench code builds it, so
there is no binary program file. It shows how the array is meant to be used.
It runs three octaves. Each PE works on a B x B block: B = 4 in octave 1
(the sampled image), 2 in octave 2 and 1 in octave 3, since each octave works
on the image halved by the one before. Per octave:

1. **Input.** Octave 1 runs `SAMPLE`, then copies the 16 pixels into local
   memory. Later octaves take the halved image left by the previous octave.
2. **Halve the image** (when B > 1). Each horizontal pair of pixels is
   replaced by its mean. Then each vertical pair of those is replaced by its
   mean. This gives the next octave's image.
3. **Integer Gaussian.** The filter is the 7-tap kernel
   1 6 15 20 15 6 1 (sum 64). Only its half `{20, 15, 6, 1}` is stored, and
   it is applied to the centre pixel and mirrored to both sides, in a row
   pass and then a column pass. Each pass:
   * copies the block into a border buffer;
   * fetches the 3 pixels beyond each edge from the west/east (or
     north/south) PEs with `COMM`. When B < 3 a pixel lies more than one PE
     away, and it travels in several hops (up to three when B = 1);
   * computes each output with one `MUL` and three `MAC`s on pre-added
     symmetric pairs;
   * rounds with `(sum + 32) >>> 6`.
4. **Levels.** A0 is the image. Level Aj applies 1, 1, 2 and 4 blur passes
   to level A(j-1), so the variance doubles from level to level (scale
   factor sqrt 2 per level). An ACU scalar loop repeats the passes. After
   the first pass of a level the blur runs in place, because a pass reads all
   of its input before it writes.
5. **DoG.** D1 = A1 - A2, D2 = A2 - A3, D3 = A3 - A4.
6. **Border copies.** Each D layer is copied into a (B+2) x (B+2) buffer,
   with a one-pixel border taken from the neighbours. The corners arrive in
   two hops: the row transfers come after the column transfers, so they carry
   the corners along.
7. **Extrema.** Two nested ACU loops walk over the B x B positions. At each
   position, two mask passes of 26 compare-and-sleep steps mark D2 pixels
   that are strictly above (mark 1) or below (mark 2) all 26 neighbours.
   The loop body addresses memory relative to registers that the loop
   advances, so the code exists only once.
8. **Output.** The program sends out the B*B marks, the B*B D2 values and,
   when B > 1, the (B/2)^2 halved pixels through the SP register. Over three
   octaves that is 47 values per PE.

Local memory map (words): border buffer 16-55, A0..A4 56-135, D1..D3 136-183,
row-pass result 184-199, marks 200-215, halved image 216-227. After the DoG
step, the bordered layer copies reuse words 0-107. In total 228 of the 256
words are used. Each octave uses the first B*B words of every 16-word area.

The program is 5,849 words long. It executes 13,114 vector and 127 scalar
instructions, for **13,241 cycles** for all three octaves at any array size.
At the published clock of 150 MHz, that is 88 us for a 256 x 256 frame. The
published run times (0.53-1.03 ms for the whole detector, for 2 to 4 octaves)
come from a different program, so the two numbers cannot be compared.

## Where this RTL departs from or goes beyond the original

* **Word width.** The original description speaks of a 16-bit data path but
  also of a 16 x 32-bit register file and 32-bit memory words. Here
  registers, memory, ALU and accumulator are 32 bits wide. The multiplier
  takes signed 16-bit operands.
* **Local memory.** One passage gives 64 words per PE. The evaluated
  configuration has 256 words, and this RTL uses 256.
* **Own choices.** The instruction set, the encoding, single-cycle execution,
  the scalar registers, the 8192-word program memory and the program load
  port are this design's own.
* **Not built:**
  * the detectors, colour filter array and sigma-delta converters (analog);
  * the unit labelled MMX in the PE diagram, which is only named.
* **SP registers and I/O** are reduced to one output register per PE with a
  valid flag.
* **Blur levels.** The published flowchart blurs each level with the same
  kernel. With equal steps, the integer DoG shows no scale extrema on any test
  image. The workload therefore doubles the variance per level, following
  the definition D = L(k sigma) - L(sigma).
* **Extrema test.** The workload uses the plain strict 26-neighbour test. It
  leaves out the published flowchart's extra |DoG| comparison between levels
  and the mapping of keypoint coordinates back to the full-size image.
* **Later SIFT stages.** Keypoint refinement, orientation and descriptors are
  not part of the hardware or of the workload.
* **Octaves.** The workload runs three octaves. A fourth would need less than
  one pixel per PE, which the program does not handle.
* **Timing.** No timing closure was attempted for 150 MHz. The combinational
  path of a `COMM` runs through a register file read, one hop of wire, and
  the write-back multiplexer.

## Files

`rtl/`
: `simd_pkg` holds the types, opcodes and the instruction word. The modules
  are: `simd_top`, `acu`, `pe_array`, `pe`, `pe_decoder`, `pe_regfile`,
  `pe_alu`, `pe_macc`, `pe_local_mem`, `pe_comm`, `pe_sleep`, `pe_pixel_buf`
  and `pe_sp_io`. Each file starts with a description of its function and
  timing.

`tb/`
: * One self-checking testbench per module, `tb_<module>`. Random stimulus
    is compared against reference code written separately from the RTL.
  * `simd_ref_pkg`, an instruction-level model of the array and of the ACU.
  * `sift_prog_pkg`, the workload generator and its golden model.
  * `tb_simd_top`, the workload on 4 x 4 PEs. Every cycle it is checked in
    lock step against the instruction-level model.
  * `tb_simd_top_full`, the same workload at the default size. This is
    64 x 64 PEs on a 256 x 256 image. It matches the golden model on all
    192,512 outputs. Its test image (grey with small bright and dark squares)
    gives 512 maxima and 512 minima in octave 1. It gives none in octaves 2
    and 3, where only the D2 values and the halved image are compared.

Every testbench prints `TB_RESULT checks=N failures=M`. It also has a
watchdog that ends a hung run.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/simd_pkg.sv tb/simd_ref_pkg.sv tb/sift_prog_pkg.sv tb/tb_simd_top.sv \
    --top-module tb_simd_top
./obj_dir/Vtb_simd_top
```

To run another testbench, replace `tb_simd_top` with its name. The
full-size run builds 4,096 PE instances. Building it takes a few minutes, and
the simulation then takes under ten seconds. For a smaller array, set `ROWS`
and `COLS` on `simd_top`. The workload generator works for any array size.
