# SPARROW in a RISC-V multiply pipe

SPARROW is a small SIMD accelerator for 8-bit AI arithmetic. It has no
vector register file. It reads two ordinary 32-bit integer registers of the
host core and treats each one as four signed or unsigned bytes. In one
instruction it applies the same operation to the four byte pairs. It can then
reduce the four results to a single value with a sum, max, min or xor.
Saturation can be applied at each step. A whole 4-element dot product with
saturation, such as one element of an int8 matrix product, is therefore a
single instruction that writes one integer register.

This repository has the accelerator in SystemVerilog, and the slice of a
dual-issue RISC-V core (a SweRV EH1-class pipeline) that hosts it:

- the decode step that recognises SPARROW instructions as a kind of multiply;
- the three-stage multiply pipe (M1, M2, M3) that holds both the integer
  multiplier and SPARROW;
- a result port shared by the multiplier and SPARROW.

The rest of the core is not included. That covers fetch, the integer and
load/store pipes, the divider, the register file, commit, writeback and the
closely coupled memories. Its connections to the multiply pipe are ports of
the top module `sparrow_eh1_top`.

## The datapath: four lanes, two stages

```
        sdi.ra, sdi.rb, rc_we, op1, op2
                  |
               [ r.s1 ]            <- clock edge 1
                  |   (late operand muxes)
          stage 1: sparrow_s1      4 x 8-bit lane ALU, code op1 (sd1)
                  |---- to_word --> sdo.bp1
               [ r.s2 ]            <- clock edge 2   (lanes, op2, sat, rc_we)
          stage 2: sparrow_s2      reduction, code op2 (sd2)
                  |---------------> sdo.bp2
               [ r.s3 ]            <- clock edge 3
                  |---------------> sdo.result, result_we
```

Lane *i* of a word is bits `8i+7:8i`.

### Stage 1 (`sd1`, 5 bits)

| code  | op    | per lane                    | code  | op    | per lane                       |
|-------|-------|-----------------------------|-------|-------|--------------------------------|
| 00000 | nop   | word = rs1                  | 10000 | merg  | word = rs2                     |
| 00001 | add   | a + b (wraps)               | 10001 | shft  | shift, see below               |
| 00010 | sub   | a − b (wraps)               | 10011 | umul  | a × b, low 8 bits              |
| 00011 | mul   | a × b, low 8 bits           | 10101 | umax  | unsigned max                   |
| 00101 | max   | signed max                  | 10110 | umin  | unsigned min                   |
| 00110 | min   | signed min                  | 11001 | sshft | shift, saturated               |
| 00111 | and   |                             | 11101 | usadd | clamp(a + b, 0, 255)           |
| 01000 | or    |                             | 11110 | ussub | clamp(a − b, 0, 255)           |
| 01001 | xor   |                             | 11111 | usmul | clamp(a × b, 0, 255)           |
| 01010 | nand  |                             | 01101 | sadd  | clamp(a + b, −128, 127)        |
| 01011 | nor   |                             | 01110 | ssub  | clamp(a − b, −128, 127)        |
| 01100 | xnor  |                             | 01111 | smul  | clamp(a × b, −128, 127)        |

Bit 4 of `sd1` marks the unsigned form of an operation. The codes that are
not listed (00100, 10010, 10100, 10111, 11000, 11010, 11011, 11100) behave
as `nop`.

**Shifts** are the least obvious operation. The rs2 lane `b` carries all
of the control:

- its sign gives the direction: `b ≥ 0` shifts left, `b < 0` shifts right;
- its bit 0 gives the type: 1 is arithmetic, so the data is signed; 0 is
  logical, so the data is unsigned;
- the amount is `|b| / 2`, rounded down.

Amounts above 8 act like 8. `sshft` clamps to [−128, 127] for arithmetic
shifts and to [0, 255] for logical ones. Which sign means "left" and which
value of bit 0 means "arithmetic" are choices made in this design. Swap
`left`/`arith` in `sparrow_s1.sv` if your software expects the opposite.

### Stage 2 (`sd2`, 3 bits)

| code | op   | result                       | code | op   | result                        |
|------|------|------------------------------|------|------|-------------------------------|
| 000  | nop  | the four lanes as one word   | 100  | xor  | xor of the lanes, zero-extended |
| 001  | sum  | signed sum, sign-extended    | 101  | usum | unsigned sum, zero-extended   |
| 010  | max  | signed max, sign-extended    | 110  | umax | unsigned max, zero-extended   |
| 011  | min  | signed min, sign-extended    | 111  | umin | unsigned min, zero-extended   |

Bit 2 of `sd2` selects unsigned lane data. Stage 2 has no saturation bit of
its own. An instruction whose stage-1 code saturates (sadd, ssub, smul,
sshft, usadd, ussub, usmul) also clamps its sum: `sum` to [−128, 127] and
`usum` to [0, 255]. Without saturation the sum keeps its full width, −512 to
508 signed or 0 to 1020 unsigned. So `smul` + `sum` computes
`clamp(Σ clamp(aᵢ·bᵢ))`, the saturating int8 dot product.

## Timing

`sparrow_core` takes one instruction per cycle:

- stage 1's result is visible on `bp1` after clock edge 1;
- stage 2's result is visible on `bp2` after edge 2;
- the final result is registered after edge 3.

Inside the host, every SPARROW instruction takes the same fixed three cycles
as an integer multiply. This holds even when only stage 1 does useful work.
The bypass words `bp1`/`bp2` are brought out as ports, but the pipe itself
never takes an early result from them.

## Integration in the multiply pipe

This is the part that needs the most care.

**Decode (`sparrow_decode`).** Two kinds of instruction are accepted into
the multiply pipe:

- the RV32M multiplies `mul`, `mulh`, `mulhsu` and `mulhu` (opcode 0110011,
  funct7 0000001, funct3 000–011);
- SPARROW instructions.

Divisions are not accepted; they belong to the divider. For a SPARROW
instruction the decoder sets the `is_sparrow` flag. Otherwise the pipe
handles it like a multiply: same issue, same result port, same forwarding.
The write enable is set when rd ≠ x0. SPARROW uses the R-type layout on the
custom-0 opcode. This layout is this design's own and must match your
assembler:

```
 31 30 | 29   25 | 24  20 | 19  15 | 14  12 | 11   7 | 6      0
  0  0 |   sd1   |  rs2   |  rs1   |  sd2   |   rd   | 0001011
```

**Pipe (`mul_pipe`).** The pipe carries valid, rd, write enable and
`is_sparrow` down M1–M3. The multiplier (`mul_unit`) and SPARROW
(`sparrow_core`) run side by side. At M3, `is_sparrow` selects which result
goes out on `out_result`.

**Late operands.** The core may forward an operand only while the
instruction is already in M1. `late_rs1_en`/`late_rs1_data` and
`late_rs2_en`/`late_rs2_data` replace the M1 operands of both datapaths.
They must be valid in the cycle when M1 moves on.

**Freeze.** `freeze` holds every register in the pipe, the multiplier and
SPARROW. A stall, for example while a late operand is on its way, therefore
loses nothing. An assertion in `mul_pipe` checks that M3 stays stable while
frozen.

**Issue rules for the host.** With results available at M3, a core driving
this pipe must do the following for a dependent instruction. `tb_sparrow_eh1_top`
models exactly this.

- If the producer is one stage ahead, wait one cycle.
- If the producer is two stages ahead, issue and supply the late operand
  from `m3_result`.
- If the producer is in M3, forward `m3_result` at decode.
- Otherwise read the register file.

## Files

| file | contents |
|------|----------|
| `rtl/sparrow_pkg.sv` | shared types: operation codes, the `sdi`/`sdo` bundles, the multiply-pipe control word, encoding constants |
| `rtl/sparrow_s1.sv` | stage 1 lane ALU (combinational) |
| `rtl/sparrow_s2.sv` | stage 2 reduction (combinational) |
| `rtl/sparrow_core.sv` | the accelerator: r.s1 / r.s2 / r.s3, hold, late operands, bypass words |
| `rtl/mul_unit.sv` | RV32M multiplier, product registered in M2, result in M3 |
| `rtl/mul_pipe.sv` | the multiply pipe with SPARROW inside |
| `rtl/sparrow_decode.sv` | multiply-class and SPARROW decode |
| `rtl/sparrow_eh1_top.sv` | top: decode + multiply pipe |
| `tb/sparrow_ref_pkg.sv` | integer reference models and instruction encoders |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the design with reference functions in
`tb/sparrow_ref_pkg.sv`. These are written separately with integer
arithmetic and literal opcode values. Each testbench prints
`TB_RESULT checks=N failures=M`. The testbenches are:

- `tb_sparrow_s1`, `tb_sparrow_s2`: every code on corner values (saturation
  edges, both shift directions, large shift amounts) and on random data;
- `tb_sparrow_core`: a random instruction every cycle, with random stalls and
  late operands. It checks `bp1`, `bp2` and `result` cycle by cycle, and
  checks the three-cycle latency of one instruction on its own;
- `tb_mul_unit`, `tb_mul_pipe`: the multiply kinds on corner and random
  operands. The pipe test mixes multiplies and SPARROW operations with
  freezes, bubbles and late operands;
- `tb_sparrow_decode`: all 256 SPARROW code pairs, the multiplies, divisions,
  other instructions and random words;
- `tb_sparrow_eh1_top`: end to end, at default parameters. The testbench
  plays the rest of the core: register file, issue, forwarding and writeback.
  It runs 80 trials of small versions of four AI kernels:
  - a 4×4 int8 matrix product (one `smul`+`sum` instruction per element);
  - four cubic polynomials by Horner's rule, as a chain of dependent
    `smul`/`sadd` instructions;
  - a greyscale conversion of RGB pixels (a logical right shift by 4, then
    `umul`+`usum` with weights 5, 9, 2);
  - two pixels of a 3×3 int8 convolution (three `smul`+`sum`, one per kernel
    row, then two `sadd`);
  - RV32M multiplies, and an `add` that the pipe must refuse.

  The instruction sequence for each kernel was written for this testbench.
  It compares the register file with a sequential execution of the program,
  and each kernel's results with scalar arithmetic. It also
  checks the M3 outputs every cycle against a shadow pipeline. It fails if
  any of these never happened: a freeze, a bubble, a late operand, a decode
  forward, a saturation, or a refused instruction.

To run one with Verilator:

```
verilator --binary --timing --assert --top-module tb_sparrow_eh1_top \
  rtl/sparrow_pkg.sv tb/sparrow_ref_pkg.sv rtl/sparrow_s1.sv rtl/sparrow_s2.sv \
  rtl/sparrow_core.sv rtl/mul_unit.sv rtl/mul_pipe.sv rtl/sparrow_decode.sv \
  rtl/sparrow_eh1_top.sv tb/tb_sparrow_eh1_top.sv -o sim
./obj_dir/sim
```

Verilator lint (`-Wall`) passes with warnings only: unused package
constants, the two top bits of the 66-bit product, and bit 0 of the shift
magnitude (the amount is `|b|/2`). The asynchronous reset is also used in
the assertion's `disable iff`.

## Size

After generic synthesis, the accelerator (`sparrow_core`) has about 510
word-level cells and 143 flip-flop bits:

- r.s1: 73 bits;
- r.s2: 37 bits;
- r.s3: 33 bits.

The whole multiply-pipe slice, multiplier included, has 267 flip-flop bits.
The 66-bit product register is the largest part of the multiplier. A
published FPGA integration of SPARROW into the EH1 core reports 2,479 LUTs
and 232 flip-flops added to the core. That is about 4% more LUTs and 0.2%
more flip-flops. The cost stays low because the accelerator has no register
file of its own.

## What is this design's own

The accelerator's operations, both stages, the three-register structure,
the bypass words, the fixed three-cycle latency in the multiply pipe and the
hold during stalls are SPARROW's. The following are choices made here, and
are worth checking before you connect other software or another core:

- **Instruction layout.** The layout on custom-0 is this design's own.
- **Shifts.** Left for a non-negative `b`, arithmetic when bit 0 is 1, and
  amounts saturating at 8.
- **Saturation limits.** [−128, 127] and [0, 255].
- **Overflow.** Non-saturating operations wrap to 8 bits. Reduction results
  are extended to 32 bits by sign or zero, and unsaturated sums keep their
  full width.
- **Undefined stage-1 codes** act as `nop`.
- **Lane order.** Lane 0 is the low byte.
- **Late operands.** They are replaced by a mux with one enable per operand.
- **Reset.** An asynchronous active-low reset, which clears all pipeline
  registers.
- **Multiplier.** The published integration only names the multiply pipe. This multiplier
  is the simplest one that gives three-cycle RV32M results.

Not modelled: the dual-issue core around the pipe, its register file and
memories, and the 34-cycle divider. The bypass words are available as ports,
but no early-result path uses them.
