# A 16-bit RISC processor with a Vedic multiplier and homogeneous hybrid adders

This is a small 16-bit load/store processor. Its multiply hardware uses the
Urdhva-Tiryakbhyam ("vertically and crosswise") method of Vedic mathematics:

- An N x N product is formed from four N/2 x N/2 products.
- Each of those is built the same way, down to a 2 x 2 cell made of four AND gates and two half adders.

Every adder in the design is a *homogeneous hybrid adder*. That is a wide
adder assembled from identical small adder modules. This applies to the
adders inside the multipliers, the ALU adder and the MAC accumulator adder.

The processor executes 14 instructions, and all of them use register
addressing. A single zero flag (Z) is set by the arithmetic instructions.
There are two units that use the multiplier:

- a Vedic ALU (add, subtract, multiply, logic);
- a Vedic multiply-accumulate (MAC) unit.

The published design fixes the overall structure:

- the processor blocks;
- the Vedic multiplier recursion;
- the hybrid-adder idea;
- the 14-instruction count;
- the Z flag.

It does not give the instruction encoding, the register count, the memory size
or the cycle-level sequencing. Those are choices made here. They are listed in
"Design choices and departures" below.

## The Vedic multiplier

### 2 x 2 cell (`vedic_mult_2x2`)

For a = a1a0 and b = b1b0:

```
p0       = a0 b0                (vertical)
{c1, p1} = a1 b0 + a0 b1        (crosswise, half adder)
{p3, p2} = c1 + a1 b1           (vertical, half adder)
```

### Doubling the width (`vedic_mult_4x4`, `_8x8`, `_16x16`)

Each operand is split into halves, a = {aH, aL} and b = {bH, bL}, each H = N/2
bits wide. Four smaller Vedic multipliers produce these products at the same
time:

```
q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH        (each N bits)
a*b = q3 * 2^N  +  (q1 + q2) * 2^H  +  q0
```

The helper module `vedic_combine` adds the four products with three hybrid
adders:

| step | adder width | computes                                 |
|------|-------------|------------------------------------------|
| 1    | N           | {c1, m} = q1 + q2                          |
| 2    | N+1         | t = {c1, m} + q0[N-1:H]                    |
| 3    | N           | u = q3 + t[N:H]                            |

The product is then `p = {u, t[H-1:0], q0[H-1:0]}`:

- The low H bits of q0 go to the output unchanged.
- The middle H bits come from adder 2.
- The top N bits come from adder 3.

Adders 2 and 3 have carry-outs that are always zero for any pair of operands.
They are the unused output bits of each stage. The module leaves them
unconnected on purpose.

The tree is 16x16 → four 8x8 → sixteen 4x4 → sixty-four 2x2. Each 2x2 cell
multiplies bits from its own slice of the operands. All partial products
therefore exist after one AND-gate delay, and the adders of each level work in
parallel. Operands are unsigned.

## The homogeneous hybrid adder (`hybrid_adder`, `rca_adder`)

A WIDTH-bit adder is cut into SEG-bit modules, with SEG = 4 by default. Every
module is the same `rca_adder`: a ripple chain of full adders. Each full adder
is two half adders plus an OR gate. The carry-out of module k is the carry-in
of module k+1. If WIDTH is not a multiple of SEG, the last module is narrower.
For example, the 17-bit adder in the 16x16 combine stage is four 4-bit modules
plus one 1-bit module.

SEG is a parameter on every multiplier, the ALU, the MAC and the top. Changing
it changes the unit module everywhere at once.

## The processor (`risc16_vedic_cpu`)

```
           +-----+   +-----+     +--------------+     +------+
 PC ------>| mux |-->| MAR |---->|    memory    |---->|  IR  |--> control unit
 R[ra] --->|     |   +-----+     | 256 x 16     |     +------+        |
           +-----+               | program+data |                     | ctrl_t
                                 +--------------+                     v
                                        |           +---------------------------+
 register bank 16 x 16 --R[ra],R[rb]--> | --------> | Vedic ALU   |  Vedic MAC  |
       ^                                |           +---------------------------+
       |   +-----+                      |                   | mux |
       +---| mux |<-- memory data ------+                   v
           |     |<-- accumulator <---------------------- result ----> Z flag
           +-----+
```

Program and data share one memory (a von Neumann arrangement). The memory
address register (MAR) holds the PC during a fetch, and a register value during
a load or store.

### Instruction format and set

```
[15:12] opcode   [11:8] rd   [7:4] ra   [3:0] rb
```

| code | mnemonic | effect                                        | Z   |
|------|----------|-----------------------------------------------|-----|
| 0    | ADD      | rd = ra + rb                                  | set |
| 1    | SUB      | rd = ra - rb                                  | set |
| 2    | MUL      | rd = (ra*rb)[15:0]; MAC accumulator = ra*rb   | set |
| 3    | MAC      | accumulator += ra*rb; rd = accumulator[15:0]  | set |
| 4    | AND      | rd = ra & rb                                  | –   |
| 5    | OR       | rd = ra \| rb                                 | –   |
| 6    | XOR      | rd = ra ^ rb                                  | –   |
| 7    | NOT      | rd = ~ra                                      | –   |
| 8    | MOV      | rd = ra                                       | –   |
| 9    | LD       | rd = mem[ra[7:0]]                             | –   |
| 10   | ST       | mem[ra[7:0]] = rb                             | –   |
| 11   | JMP      | pc = ra[7:0]                                  | –   |
| 12   | JZ       | if Z: pc = ra[7:0]                            | –   |
| 13   | HLT      | stop                                          | –   |

Z is 1 when the 16-bit value written to rd is zero. Codes 14 and 15 are unused
and act as no-operations.

There are no immediate operands. Constants come from memory with LD. A program
can reach its constant table with no constant at all:

1. `NOT R1, R0` gives FFFF, which addresses word 255.
2. `SUB R2, R0, R1` gives 1.

The end-to-end testbench starts its program this way.

### MAC unit

The accumulator is 32 bits wide and wraps modulo 2^32:

- MUL starts a new sum: the accumulator becomes the product.
- MAC adds the product to the accumulator.

MAC writes the low 16 bits of the new sum to rd. The full 32 bits are visible
on the `mac_acc` port. The ALU has its own copy of the 16x16 multiplier, so
the ALU and the MAC unit stay independent blocks.

### Timing

Each instruction takes four clock cycles (`control_unit`):

| state     | action                                                                          |
|-----------|---------------------------------------------------------------------------------|
| FETCH     | MAR ← PC                                                                        |
| LOAD_IR   | IR ← mem[MAR], PC ← PC + 1                                                      |
| EXECUTE   | accumulator ← ALU/MAC result, Z updated; or MAR ← R[ra] (LD/ST); or PC ← R[ra] (JMP, JZ when Z = 1) |
| WRITEBACK | R[rd] ← accumulator or mem[MAR]; or mem[MAR] ← R[rb]                            |

HLT stops in EXECUTE and moves to HALT, which only reset leaves. Nothing is
pipelined. The longest combinational path runs from the register bank, through
the ALU or MAC multiplier and adders, into the accumulator.

### Ports and use

All registers have an asynchronous active-low reset (`rst_n`). The memory is
not reset.

To run a program:

1. Hold `rst_n` low and `load_en` high.
2. Write words through `load_we`, `load_addr` and `load_wdata`.
3. Release `rst_n`, then drop `load_en`. The processor fetches from address 0.
4. Wait for `halted`.
5. Raise `load_en` again and read results on `mem_rdata`.

`dbg_reg_sel`/`dbg_reg_data` read any register at any time. `pc`, `z`,
`mac_acc` and `state` are status outputs. The host must not raise `load_en`
while a program is running. An assertion checks that the processor never
writes memory while `load_en` is high.

## Files

| file | content |
|------|---------|
| `rtl/risc16_pkg.sv` | widths, opcode/ALU/state enums, control-signal struct |
| `rtl/half_adder.sv`, `full_adder.sv`, `rca_adder.sv`, `hybrid_adder.sv` | adders |
| `rtl/vedic_mult_2x2.sv` … `vedic_mult_16x16.sv`, `vedic_combine.sv` | Vedic multipliers |
| `rtl/vedic_alu.sv`, `vedic_mac.sv` | ALU and MAC |
| `rtl/register_bank.sv`, `program_counter.sv`, `instruction_register.sv`, `mar.sv`, `memory.sv`, `accumulator.sv`, `z_flag.sv`, `mux2.sv` | datapath parts |
| `rtl/control_unit.sv` | sequencer |
| `rtl/risc16_vedic_cpu.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, to run the processor test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/risc16_pkg.sv tb/tb_risc16_vedic_cpu.sv --top-module tb_risc16_vedic_cpu
./obj_dir/Vtb_risc16_vedic_cpu
```

To run another block, replace the testbench name.

`tb_risc16_vedic_cpu` uses the default configuration. It loads a program that
takes the dot product of two random 8-element vectors with MUL/MAC in a loop
counted down with SUB, left with JZ and repeated with JMP. It then stores the
results of the logic, move and multiply instructions, and halts. It checks:

- every stored word, several registers and the 32-bit accumulator, against values it computes itself;
- the four-cycle instruction time and the total cycle count (95 instructions, 380 cycles);
- that each of the following happened at least once: every opcode, the unused opcode, Z set and cleared, JZ taken and not taken, accumulation onto a non-zero sum, halt and host loading.

The multiplier testbenches are exhaustive up to 8x8 (65,536 pairs). The 16x16
multiplier is checked with corner operands plus 20,000 random pairs.

## Design choices and departures

These are choices made here, where the published design gives no detail:

- instruction encoding;
- the exact 14 instructions;
- 16 registers;
- a 256-word memory with 8-bit addresses;
- the four-cycle, non-pipelined sequence;
- the host load port;
- asynchronous resets;
- the MUL/MAC split of the accumulator;
- the 32-bit accumulator;
- 4-bit ripple-carry units in the hybrid adder;
- the exact three-adder combine stage.

Three points depart from or go beyond the published description:

- **Not RISC-V.** The title mentions RISC-V applications, but the processor it
  describes is a 14-instruction 16-bit machine. That is what is built here. It
  does not run RISC-V code.
- **Z is a zero flag.** The description also calls Z a sign that an
  instruction "was not properly executed". Here Z follows its other
  description: it reflects the result of the arithmetic group.
- **Two multipliers.** The ALU and the MAC unit each contain a 16x16 Vedic
  multiplier. A design squeezed for area could share one.

Published FPGA figures (for comparison only; not reproduced here):

| figure               | value              |
|----------------------|--------------------|
| LUTs                 | 1289               |
| slice registers      | 204                |
| I/O pins             | 74                 |
| clock period         | 25.673 ns (≈39 MHz) |
| levels of logic      | 112                |
| "extension" variant  | 1267 LUTs          |

What the "extension" variant changes is not described, so it is not built.
Generic synthesis of this design gives about 2100 word-level cells, 340
flip-flops (256 of them the register bank) and a 4096-bit memory. LUT count
and speed need a vendor flow.
