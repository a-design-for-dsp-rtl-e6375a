# A small vector DSP processor with an iterative Mitchell multiplier

This is a 16-bit DSP processor built for the elementwise arithmetic at the
heart of transform kernels: multiply two signals sample by sample, multiply
and accumulate a third, add or subtract signals, scale by two. A single
instruction names one operation, a length, and a start position in each of
three signal memories; the processor then walks the samples on its own and
stores one 32-bit result per sample. The instruction set is tiny (17 opcodes)
and its opcode bits drive the arithmetic units directly, so there is almost
no decoding. Multiplication uses Mitchell's logarithmic method in its
iterative form, which trades exactness for area with one parameter.

## Blocks

```
             +--------------- dsp_top ----------------------------------+
 prog_wr_* ->| MEM3 program (mem3_program) --instr--> CU (dsp_cu, FSM)  |
             |                                          | addresses,     |
 sig_wr_*  ->| MEM1 signals (mem1_signals)              | load enables,  |
             |   bank 1 -> s1 ----+                     | opcode         |
             |   bank 2 -> s2 ----+-> registers (dsp_regs) S1 S2 S3     |
             |   bank 3 -> s3 ----+                |                    |
             |                      ALU (alu): shifter -> Mitchell      |
             |                      multiplier -> adder-subtractor      |
             |                                     |                    |
             |                      registers RES <-+                   |
 res_rd_*  <-| MEM2 results (mem2_results): LSB bank | MSB bank  <-RES  |
             +----------------------------------------------------------+
```

| File | Block |
|---|---|
| `rtl/dsp_pkg.sv` | widths, opcode bit positions, the 17 mnemonics, the instruction struct |
| `rtl/dsp_top.sv` | the processor |
| `rtl/dsp_cu.sv` | FSM control unit |
| `rtl/dsp_regs.sv` | working registers S1, S2, S3, RES |
| `rtl/alu.sv` | ALU: wires the three units below to the opcode bits |
| `rtl/shifter.sv` | one-place left/right shift of signal one |
| `rtl/mitchell_mul.sv` | iterative Mitchell multiplier |
| `rtl/addsub.sv` | 32-bit adder-subtractor |
| `rtl/mem1_signals.sv` | MEM1: three signal banks read in parallel |
| `rtl/mem2_results.sv` | MEM2: results split into an LSB bank and an MSB bank |
| `rtl/mem3_program.sv` | MEM3: program memory |

## Numbers

Samples are 16-bit two's-complement fixed point with six fraction bits
(Q10.6): 13.75 is `0000001101.110000` = 880, and 1.0 is 64. The range is
-512.0 to +511.984375.

Results are 32 bits with the same six fraction bits (Q26.6). A product of two
Q10.6 samples has twelve fraction bits; the multiplier drops six of them
(truncating the magnitude, i.e. rounding toward zero) so that products, sums
and differences all share one binary point. The largest magnitude any
instruction can produce is 2^24 + 2^15, so results never overflow.
Each result is stored as two 16-bit words at the same address: bits 15:0 in
the LSB bank (MEM2-1), bits 31:16 in the MSB bank (MEM2-2).

## Instruction set

The opcode is eight bits, and each bit switches on a unit:

| bit | 7 | 6 | 5 | 4 | 3 | 2 | 1:0 |
|---|---|---|---|---|---|---|---|
| meaning | combined op | multiply | add | subtract | shift signal one | 1 = left, 0 = right | don't care |

With s1' = signal one after the optional shift:

| Hex | Mnemonic | Result |
|---|---|---|
| 40 | MUL | s1 * s2 |
| 48 / 4C | MRS / MLS | (s1 >> 1) * s2 / (s1 << 1) * s2 |
| E0 | MAD | s1 * s2 + s3 |
| E8 / EC | MAR / MAL | s1' * s2 + s3 with right / left shift |
| D0 | MAS | s1 * s2 - s3 |
| D8 / DC | MSR / MSL | s1' * s2 - s3 with right / left shift |
| 20 | ADD | s1 + s2 |
| 28 / 2C | ARS / ALS | s1' + s2 |
| 10 | SUB | s1 - s2 |
| 18 / 1C | SRS / SLS | s1' - s2 |
| 08 / 0C | RS / LS | s1' |
| 00 | HLT | end of program (this design's addition) |

Right shift is arithmetic (halves, rounding toward minus infinity); left shift
doubles and drops the top bit. Bit 7 only marks the combined instructions;
the ALU ignores it. Any other pattern of bits 7:2 is illegal and stops the
program with `error` set. `dsp_pkg::mnemonic_e` lists these names;
the EC instruction is called MAL here to keep it distinct from MAS (D0).

An instruction word is 48 bits (`dsp_pkg::instr_t`), most significant field
first:

| opcode (8) | len (8) | s1_base (8) | s2_base (8) | s3_base (8) | res_base (8) |
|---|---|---|---|---|---|

For i = 0 .. len-1 it computes `op(MEM1-1[s1_base+i], MEM1-2[s2_base+i],
MEM1-3[s3_base+i])` and stores it at `MEM2[res_base+i]`. Addresses wrap at
256. An instruction with len = 0 does nothing; the three signals may start
anywhere, independently.

## Control unit timing

The control unit is a Moore FSM; each state lasts one clock:

```
IDLE --start--> FETCH -> DECODE --+--> READ -> LOAD -> EXEC -> WRITE --+
                  ^               |     ^                             |
                  |               |     +-------- more samples -------+
                  +---------------+--- len = 0 or last sample --------+
                 DECODE of HLT or an illegal opcode --> DONE --!start--> IDLE
```

- FETCH presents the program counter to MEM3; DECODE latches the word into
  the instruction register and decides what follows.
- READ presents the three sample addresses to MEM1 (synchronous read).
- LOAD clocks the three samples into S1, S2, S3.
- EXEC: the ALU is purely combinational, so the result is ready within this
  clock and RES loads it at its end.
- WRITE stores RES in both halves of MEM2.

An instruction therefore takes **2 + 4·len clocks**, and every sample spends
exactly one clock in the ALU. A program of instructions I1..In ending in HLT
keeps `busy` high for sum(2 + 4·len) + 2 clocks. The four-clock sample loop is
not pipelined; overlapping READ of sample i+1 with EXEC of sample i would
bring it toward one clock per sample, but that is not done here.

## The iterative Mitchell multiplier

For positive N = 2^k + r (k the position of the leading one, r the rest):

```
N1*N2 = 2^(k1+k2) + r1*2^k2 + r2*2^k1 + r1*r2
```

The first three terms need only leading-one detectors, shifters and adders.
Mitchell's approximation drops r1*r2. The iterative method treats r1*r2 as a
new product of the same form and repeats, with r1 and r2 as the operands. Each
round removes the leading one of both residues, so after i rounds the error
is exactly the product of the two operands with their i highest set bits
cleared, and it is zero as soon as either residue is zero. For 16-bit
magnitudes, 16 rounds always give the exact product.

`mitchell_mul` unrolls `ITERATIONS` rounds into combinational logic (default
16, exact). `ITERATIONS = 1` is plain Mitchell; its result is never too large
and at most 25% too small (for example 3.0 x 3.0 gives 8.0, and two rounds
give 9.0). Signs are handled outside the rounds: the unit multiplies
magnitudes, then negates if the operand signs differ. The top passes the
choice through as `dsp_top #(.MUL_ITERATIONS(n))`. With 16 rounds the unit is
much larger than a plain array multiplier would be; the iteration count is
the knob for area against accuracy.

## Using the top

Ports of `dsp_top` (all synchronous to `clk`, `rst_n` asynchronous, active low):

| Port | Dir | Width | Use |
|---|---|---|---|
| `prog_wr_en/addr/data` | in | 1/8/48 | write an instruction word into MEM3 |
| `sig_wr_en/bank/addr/data` | in | 1/2/8/16 | write a sample into MEM1 bank 0, 1 or 2 |
| `start` | in | 1 | level; raise to run the program from address 0 |
| `busy`, `done`, `error` | out | 1 | running; finished; finished on an illegal opcode |
| `res_rd_addr` | in | 8 | result address |
| `res_rd_lsb`, `res_rd_msb` | out | 16 | result halves, one clock after the address |

Sequence: load samples and program while idle, raise `start`, wait for
`done`, lower `start` (the unit returns to IDLE), read the results. The host
ports are not arbitrated against the running program; load only while idle.

Parameters: `MUL_ITERATIONS` (16) and `MEM_DEPTH` (256 words per memory
bank; addresses are 8 bits, `dsp_pkg::ADDR_W`).

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`; expected values come from integer arithmetic
in `tb/dsp_ref_pkg.sv`, not from the RTL.

| Testbench | What it checks |
|---|---|
| `tb_mitchell_mul` | 1, 3 and 16 rounds against the exact product minus the residual error; 13.75 x 2 |
| `tb_addsub`, `tb_shifter` | random and exhaustive operands |
| `tb_alu` | all 17 opcodes with random don't-care bits and random samples |
| `tb_dsp_regs`, `tb_mem1_signals`, `tb_mem2_results`, `tb_mem3_program` | load/hold, bank separation, read latency |
| `tb_dsp_cu` | random programs: every read/write address, load timing, 2 + 4·len clocks, empty instructions, HLT, error stop |
| `tb_dsp_top` | whole processor at default parameters: every instruction, results read back from both halves, cycle count, error stop; counts each mechanism |
| `tb_mul_workload` | MUL of two 5-sample signals stored at different positions, exact and 1-round multipliers side by side, 22-clock instruction |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/dsp_pkg.sv tb/dsp_ref_pkg.sv tb/tb_dsp_top.sv --top-module tb_dsp_top
./obj_dir/Vtb_dsp_top
```

All of them finish in well under a second of simulation.

## How closely this follows the original description

Taken from the description of the processor: the 16-bit data width; six
fraction bits and the 13.75 example; the split into control unit, registers,
ALU, a three-bank signal memory and a two-bank (LSB/MSB) result memory, plus
a third memory block; an FSM control unit that fetches, extracts the opcode,
reads the signals, drives the ALU and writes results; an ALU of
adder-subtractor, shifter and iteration-based Mitchell multiplier; the 17
opcodes and the meaning of their bits; and instructions that run over
signals of a given length with different start positions.

Choices made here, where the description is silent or unclear:

- Signed two's-complement samples, the Q26.6 result format and truncation of
  products.
- Which signal each unit reads: the shift acts on signal one, the third
  signal is the one added to or subtracted from a product.
- The third memory holds the program. The description also says
  instructions come from the result memory; a separate program memory was
  kept instead.
- The instruction word layout, the 8-bit addresses and length, memory depths
  of 256, HLT, the error stop, the host ports and the start/done handshake.
- "Every instruction in one cycle" is met per sample in the ALU only; the FSM
  around it needs 4 clocks per sample and 2 per instruction.
- The iteration count of the multiplier (16, exact) and the unrolled,
  single-clock structure of the multiplier.
- The EC opcode is named MAL rather than reusing MAS.

The original work reports a Virtex-4 implementation (184 slices, 329 LUTs,
143 flip-flops, 271.5 MHz). This RTL was not built for an FPGA and makes no
claim to those numbers; with the exact 16-round multiplier it is certainly
larger.
