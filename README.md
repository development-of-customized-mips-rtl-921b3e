# CMIPS_32: a MIPS_32 pipeline with whole-image instructions

A plain MIPS_32 core processes an image with a software loop. Each 32-bit word of pixels
costs about six instructions: two loads, the operation, a store, a pointer update and a
branch. CMIPS_32 adds *image-processing instructions* (IPIs) that replace the whole loop.
An IPI is fetched once. The decode stage then re-issues it once per clock, and each issue
handles one word of four 8-bit pixels. Two small units compute the addresses and detect the
end of the image:

* the **ACU** (address calculation unit) generates the read, write and second-image
  addresses;
* the **LPDU** (last-pixel detection unit) notices when the read address has passed the end
  of the image.

For a 55×55-pixel image (757 words), one `AddIm` occupies the core for 762 clocks. The
equivalent standard-instruction loop on this core takes 6812 clocks.

The pipeline has six stages: IF, ID, EX1, EX2, MA, WB. EX2 holds a second ALU. Only the two
IPIs that need a second operation use it (gamma correction and edge detection). Every other
instruction goes from EX1 straight to MA, so it sees a five-stage pipeline.

Everything is synthesizable SystemVerilog in `rtl/`. Self-checking testbenches are in `tb/`.

## Instruction formats

Standard instructions (SI) use the MIPS_32 R, I and J formats. A word whose top six bits are
all ones is an IPI:

| bits    | 31:26      | 25:20      | 19:15 | 14:10 | 9:5 | 4:0 |
|---------|------------|------------|-------|-------|-----|-----|
| field   | `111111`   | IPI opcode | rs    | rt    | rd  | rz  |

On entry, these registers hold the following:

* `rs` holds the byte address of the source image in block memory.
* `rt` holds either the second image's address in kernel memory or a scalar (brightness
  step, threshold).
* `rd` holds the address where the result is written, in block memory.
* `rz` holds the image size in pixels.

| opcode | mnemonic | per-pixel result (p = source, k = second image, s = low byte of R[rt]) | stages |
|---|---|---|---|
| 0 | IncBri | min(p + s, 255) | 5 |
| 1 | DecBri | max(p − s, 0) | 5 |
| 2 | AndIm  | p & k | 5 |
| 3 | AddIm  | min(p + k, 255) | 5 |
| 4 | SubIm  | max(p − k, 0) | 5 |
| 5 | ThIm1  | p ≥ s ? 255 : 0 (binary image) | 5 |
| 6 | NagIm  | 255 − p (negative) | 5 |
| 7 | ThIm2  | p ≥ s ? p : 0 | 5 |
| 8 | GamIm  | EX1: t = min(p·k, 255); EX2: min(t·SR, 255) | 6 |
| 9 | EdgIm  | EX1: t = \|p − k\|; EX2: t ≥ SR ? p : 0 | 6 |

`SR` is a special register that feeds ALU-2. It is written by the R-type instruction with
function code `6'h3F` (`MTSR rs`: SR ← R[rs]).

The standard instructions implemented are:

* `add addu sub subu and or xor nor slt sltu sll srl sra`;
* `addi addiu slti sltiu andi ori xori lui`;
* `lw sw beq bne j`.

Any other opcode is a no-operation.

Pixels are packed four to a word, little-endian: the pixel at the lowest byte address is in
bits 7:0. Addresses are byte addresses and need not be word-aligned. For example, an image
may start at address 10.

## How an image instruction runs

This is the least obvious part of the design. It is built around one idea: **the pixels
travel through the register file**.

Each issue of the IPI (an *iteration*) does four things:

1. In **ID**, it reads registers `rs` and `rt` as operands, together with `rd`, `rz` and `SR`.
2. In **EX1**, ALU-1 applies the operation to those four pixel pairs. In the same cycle, the
   ACU produces the next block read address (`BMAr`), the kernel read address (`KMAr`) and
   the block write address (`BMAw`).
3. In **MA**, it reads the next word from block memory (and from kernel memory, for
   two-image instructions) and writes its processed word to block memory.
4. In **WB**, it writes the words just read back into `rs` and `rt`.

On the first iteration, `rs` and `rt` still hold the start addresses. From then on they hold
pixels, so **an IPI destroys the contents of `rs` and `rt`**, and `rs` must differ from `rt`.

The register file is write-first: a register written in WB reads back the new value in ID
during the same cycle. So the word read by iteration *j* is processed by iteration *j + LAT*:

* LAT = 3 for a five-stage IPI (ID→EX1→MA→WB);
* LAT = 4 for a six-stage IPI, which also passes through EX2.

The control unit counts iterations and drives the ACU and the memories as follows:

| signal | meaning | value in iteration *j* |
|---|---|---|
| `Lo` | ACU/LPDU use their own registers, not the start addresses | *j* > 0 |
| `Mr` | read block memory (and write registers rs/rt) | until the last pixel is seen |
| `Kr` | read kernel memory (and write rt) | two-image IPIs |
| `Mw` | write block memory | *j* ≥ LAT |
| `St` | advance the write address | *j* > LAT |

The ACU keeps three address registers, A, B and C:

* `BMAr = Lo ? A + 4 : Ad1`
* `BMAw = St ? B + 4 : (Lo ? B : Ad2)`
* `KMAr = (Lo & Kr) ? C + 4 : (Lo ? C : Ad3)`

Ad1 is the source start (`rs`), Ad2 the result start (`rd`) and Ad3 the kernel start (`rt`).
Each register loads the value it has just produced.

In the first iteration, the LPDU stores `Ad1 + roundup4(size)` in its `SZR` register. From
then on it compares `BMAr` with `SZR`. When they are equal, every word has been read, and it
raises **Reset&Update**.

Reset&Update reaches the control unit while ID is issuing the following iteration. From that
point, the control unit:

* stops reading memory;
* issues LAT − 2 further iterations, so that every word already read is also processed and
  written;
* then releases the PC.

An IPI over W words therefore keeps ID for **W + 5 clocks** (five-stage) or **W + 7 clocks**
(six-stage). This count includes the cycles in which the next instruction waits for the
last iterations to drain. The PC holds until the last iteration issues.

The bytes after the last pixel, up to the end of the last word, are written as well. They
hold whatever the operation makes of the bytes that follow the source image.

Two more rules keep an IPI's register traffic apart from its neighbours:

* An IPI does not start while an older instruction is still in EX1, EX2 or MA. It reads its
  start addresses only once, so they must already be in the register file.
* The instruction after an IPI waits in ID until the IPI's last iteration has left MA.

## Standard-instruction pipeline

SIs use classic MIPS_32 handling:

* forwarding of ALU results from MA and from WB (MA has priority);
* a one-cycle stall when an instruction uses the result of the load just ahead of it;
* branches resolved in EX1, which discards two wrong-path instructions;
* jumps resolved in ID, which discards one.

There are no delay slots, and no register is hard-wired to zero. Reset clears all registers,
and the testbenches use R0 as zero by convention.

## Blocks

| file | block | stage |
|---|---|---|
| `cmips_pkg.sv` | opcodes, ALU codes, control word `ctrl_t`, stage record `stage_t`, event strobes | – |
| `cmips32.sv` | top: pipeline registers, muxes, PC, memories | all |
| `instr_mem.sv` | instruction memory, loader port | IF |
| `control_unit.sv` | SI/IPI decoder and IPI iteration sequencer | ID |
| `reg_file.sv` | 32×32 registers + SR; 4 read ports, 2 write ports, write-first | ID/WB |
| `imm_unit.sv` | immediate extension, branch and jump targets | ID |
| `hazard_unit.sv` | load-use, IPI entry and IPI drain stalls; branch/jump flushes | ID |
| `forward_unit.sv` | MA/WB forwarding for SIs | EX1 |
| `alu1.sv` | integer ALU and the per-pixel operations | EX1 |
| `acu.sv` | address calculation unit | EX1 |
| `lpdu.sv` | last-pixel detection unit | EX1 |
| `alu2.sv` | second per-pixel operation with SR | EX2 |
| `data_mem.sv` | byte-addressed memory, 32-bit ports + host byte port (block and kernel memory) | MA |
| `pipe_reg.sv` | stage register with hold and flush, type-parameterised | – |

Top-level parameters are `IMEM_WORDS = 256`, `BMEM_BYTES = 16384` and `KMEM_BYTES = 8192`.
These sizes are large enough for two 55×55 images plus results.

The top's ports are:

* the instruction loader: `imem_we`, `imem_waddr` (word index) and `imem_wdata`;
* a host byte port into each data memory, for loading images and reading results;
* `pc`;
* an `events` struct of one-cycle strobes: stalls, flushes, forwards, IPI issue, EX2
  used/skipped, last pixel, and memory read and write in the same cycle.

Reset is synchronous and active low.

The memories read combinationally and write on the rising edge. An IPI's read and write in
MA therefore land in the same clock, and a read of the address being written returns the old
data.

## Where this design departs from, or goes beyond, its source description

The source description gives the following:

* the pipeline and its optional EX2;
* the IPI table and formulas;
* the RF port list;
* the control signal names;
* the ACU equations and circuit;
* the LPDU operation;
* the 757/762 clock figures.

The following are this design's own choices:

* **Opcodes and ALU codes.** The numeric IPI opcodes (0–9, in table order), the ALU
  operation encodings and the `MTSR` instruction are not given.
* **Saturation.** Pixel sums, differences and products saturate at 0 and 255.
* **Gamma correction.** The instruction table writes GamIm as p·k raised to the power SR. The
  published waveform instead shows ALU-2 multiplying by SR (3 × 20 = 60 per pixel), and the
  waveform is what is implemented. A true power function would need a lookup table or an
  iterative unit.
* **Edge detection.** The formula uses SR as the threshold and is followed. A sentence that
  calls `rt` the threshold is not.
* **Size rounding.** The LPDU rounds the size up to a whole word. Otherwise 3025 pixels
  (not a multiple of 4) would never produce an equal compare.
* **ACU port wiring.** The ACU's internal equations are followed exactly. One text sentence
  labels the ACU inputs differently (Ad2 as the kernel start, Ad3 as the result start). The
  equations and the register-file description agree with each other, so those are followed.
* **Hazard handling.** The source shows no hazard unit for the extended core. The IPI entry
  and drain stalls, SI forwarding and the load-use stall are added here.
* **Memory timing.** The source reads memory on one clock edge and writes on the other. This
  design uses a single edge, with the same read-before-write effect.
* **Memory sizes and loading.** Memory sizes, the host and loader ports, little-endian
  packing, unaligned access and synchronous reset are not described.
* **PC during drain.** The PC is released when the last iteration issues, not when it
  retires. The next instruction is fetched but held in ID until the iterations have drained.
* **Loop clock count.** The standard loop is estimated at 6 clocks per word (4547 for
  757 words). On this core it takes 9 (6812), because the loop has a load-use stall and a
  taken branch that flushes two slots. The measured `AddIm` speedup is therefore 8.9 rather
  than 6.

Not covered: the FPGA mapping and its power and resource figures, and any timing closure.

## Testbenches

Each block has a self-checking testbench `tb/tb_<module>.sv`, and
`tb/cmips_asm_pkg.sv` holds instruction encoders and a pixel reference model. Every
testbench ends with `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_cmips32` exercises the core at its default sizes in two parts:
  * standard instructions: ALU, forwarding, load-use, branches, jump and a loop;
  * all ten IPIs on small images, with odd sizes and an unaligned start.

  It checks every output pixel, that nothing is written past the last word, and the W+5 /
  W+7 clock counts. It also counts each pipeline mechanism (both stalls, both forwards,
  flushes, EX2 use and skip, last-pixel detection, memory read and write in the same clock)
  and fails if any never occurs.
* `tb_cmips32_full` runs the 55×55 workload at default sizes:
  * the standard add loop;
  * `AndIm R1,R2,R3,R4` with R1 = 10, R2 = 10, R3 = 3500, R4 = 3025;
  * `AddIm` and `ThIm1` (threshold 128);
  * `EdgIm` (SR = 40) and then `NagIm`, both in place over the source image.

  It checks all 3025 pixels of each result. It requires 762 clocks for each five-stage IPI,
  764 for `EdgIm` and 6812 for the loop, and prints the speedup.

To run one with Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/cmips_pkg.sv tb/tb_cmips32_full.sv \
          --top-module tb_cmips32_full -Mdir obj_full
./obj_full/Vtb_cmips32_full
```

Replace the testbench name to run another (for example, `tb_acu`). All memories and
registers are reset or loaded before use, so results do not depend on initial values.

## Changing the design

* **New IPI.** Add an opcode to `ipi_op_e` and a per-pixel function to `alu1.sv` (and
  `alu2.sv` if it needs EX2). Then add a row to the IPI decode `case` in `control_unit.sv`,
  setting `two_image`, `scalar` and `ex2`. Iteration timing follows from `ex2` alone.
* **Memory sizes.** Memory sizes are parameters of `cmips32`. Address arithmetic wraps
  modulo the memory size.
* **Memory timing.** To move to synchronous-read block RAM, add one pipeline stage in MA and
  raise LAT by one in `control_unit.sv`.
