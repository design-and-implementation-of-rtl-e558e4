# Pipelined reversible Vedic RISC processor

This is a small 16-bit load/store processor. It runs one instruction per
clock through a four-stage pipeline: fetch, decode, execute and store. Its
ALU is built from a single kind of cell, a three-input, three-output
*reversible* logic gate. Reversible means the gate maps inputs to outputs one
to one, so the inputs can always be recovered. The gate is used for the
logic functions, for the adders and, through a divide-and-conquer
(*Vedic*) multiplier, for multiplication. The RTL follows the paper
"Design and Implementation of Pipelined Reversible Vedic RISC Processor",
which gives:

- the organisation: 16-bit data, separate program and data memories, eight
  instructions, and four stages called IF, ID, EX and ST;
- the ALU block structure;
- the reversible gate's equations;
- the multiplier's construction.

The paper leaves out the instruction encoding, the register count, the
memory sizes and the hazard handling. These are this design's own choices,
and they are marked as such below.

All files are SystemVerilog (IEEE 1800-2017). The processor is in `rtl/`. A
self-checking testbench for every block is in `tb/`; the two small helper
cells, `rev_full_adder` and `vedic_combine`, are tested through the adder
and multiplier testbenches.

## The reversible gate and what is built from it

`rev_gate` computes, bit by bit:

| output | value              |
|--------|--------------------|
| P      | A                  |
| Q      | NOT(A OR B) XOR C  |
| R      | (A AND B) XOR C    |

Any one of the three inputs can act as a control, with the other two
carrying data. Holding the control at a constant gives the usual gates:

| function | A | B | C | output |
|----------|---|---|---|--------|
| AND      | a | b | 0 | R      |
| NAND     | a | b | 1 | R      |
| NOR      | a | b | 0 | Q      |
| OR       | a | b | 1 | Q      |
| XOR      | 1 | a | b | R      |
| XNOR     | 0 | a | b | Q      |
| NOT a    | 0 | a | 0 | Q      |
| buffer a | a | - | - | P      |

`logic_unit` is one row of 16 such gates with input steering and an output
multiplexer, so the table above is the whole logic unit. The paper shows a
gate followed by a multiplexer. The choice of control input for each
function is this design's own.

`rev_full_adder` is made of four gates. The paper asks for a reversible
adder but does not give its circuit, so this one is this design's own:

- `p = R(1, a, b) = a ^ b`
- `s = R(1, p, cin)`
- `g = R(a, b, 0) = a & b`
- `cout = R(p, cin, g) = (p & cin) ^ g`

The XOR in the last line equals an OR because `p & cin` and `g` are never
both 1. Other blocks reuse these cells:

- `rev_adder` chains the full adders into a ripple-carry adder.
- `rev_subtractor` inverts B with a row of gates (the NOT row of the table)
  and adds it with carry-in 1. Its carry out is 1 when there is no borrow.

## Vedic multiplier

`vedic_mul2` multiplies two 2-bit numbers. It forms the four bit products
with the gate's AND, then adds the two middle products and the top product
with two half adders.

Larger multipliers split each operand into a low half and a high half of H
bits and compute four sub-products:

```
X0 = aL*bL   X1 = aL*bH   X2 = aH*bL   X3 = aH*bH
y[H-1:0]  = X0[H-1:0]
y[2N-1:H] = (X1 + X0[N-1:H]) + (X2 + (X3 << H))
```

The three additions are the three adders of `vedic_combine`. The paper
draws this for N = 4, built from four 2-bit multipliers. `vedic_mul`
repeats the step level by level for any power of two:

- level 0 holds a `vedic_mul2` for every pair of 2-bit digits;
- each later level combines four products from the level below.

The ALU uses N = 16. The paper's bit equations for the 4-bit case leave
out the carries between columns. The carries are kept here, so the product
is exact.

## ALU

`alu` combines three units:

- `arith_unit` holds the adder, the subtractor, the multiplier and a
  divider. A two-bit select (SL[1:0] in the paper) picks one of them: 00
  add, 01 subtract, 10 multiply, 11 divide. Multiply keeps the low 16 bits
  of the 32-bit product. Divide is unsigned and returns the quotient.
- `logic_unit`.
- `barrel_shifter`: shift left, shift right, arithmetic right shift and
  rotate right, by 0 to 15 places. It is built as four stages of 1, 2, 4
  and 8 places.

An output multiplexer picks one of the three results. The paper names a
barrel shifter in the ALU but does not describe it, so its operations are
this design's choice.

The paper clocks the ALU's units. Here the ALU is combinational, and the
EX/ST pipeline register holds its result.

The paper's text lists division among the arithmetic unit's operations,
but its arithmetic-unit diagram shows only the adder, the subtractor and
the multiplier. The divider follows the text and uses the fourth select
code, which would otherwise be unused. `rev_divider` is a restoring array:

- it has 16 stages, one per quotient bit, from the top bit down;
- each stage shifts the partial remainder left and brings in the next
  dividend bit;
- it then tries a 17-bit reversible subtraction of the divisor;
- if there is no borrow, the quotient bit is 1 and the difference becomes
  the new remainder; otherwise the quotient bit is 0 and the remainder is
  kept.

Dividing by zero gives a quotient of all ones. The divider's circuit is
this design's own.

## Instruction set

There are eight general registers R0 to R7. All instructions are 16 bits
wide, with the opcode in bits [15:13].

| opcode | mnemonic | operation                                    |
|--------|----------|----------------------------------------------|
| 000    | HLT      | stop; `halt` rises once HLT completes         |
| 001    | ADD      | rd = rs1 + rs2                               |
| 010    | SUB      | rd = rs1 - rs2                               |
| 011    | MUL/DIV  | fn[0]=0: rd = low 16 bits of rs1 * rs2; fn[0]=1: rd = rs1 / rs2 |
| 100    | LOG      | rd = logic function fn[2:0] of rs1, rs2      |
| 101    | SHF      | rd = shift of rs1 by rs2[3:0], mode fn[1:0]  |
| 110    | LD       | rd = M[R[base][12:0] + off]                  |
| 111    | ST       | M[R[base][12:0] + off] = R[reg]              |

The formats are:

- ALU instructions: `op rd[12:10] rs1[9:7] rs2[6:4] fn[3:0]`
- LD and ST: `op reg[12:10] base[9:7] off[6:0]`, where `off` is unsigned

Logic functions, `fn[2:0]`: 0 AND, 1 OR, 2 NAND, 3 NOR, 4 XOR, 5 XNOR,
6 NOT rs1, 7 rs1.

Shift modes, `fn[1:0]`: 0 left, 1 right, 2 arithmetic right, 3 rotate
right.

An all-zero word is HLT. There are no branches or jumps, because the paper
lists none. `risc_pkg` has helpers (`enc_r`, `enc_m`) that build
instruction words.

ALU instructions (not loads) update a status register `{carry, negative,
zero}`. Carry is the adder's carry out, or "no borrow" for SUB, and 0 for
the other units.

The paper says there are eight instructions covering arithmetic, logic,
shifts and load/store. The opcodes, fields and status bits above are this
design's own.

## Pipeline and timing

| stage | module         | work                                                          |
|-------|----------------|---------------------------------------------------------------|
| IF    | `fetch_unit`   | reads program memory at PC; PC + 1; fills IF/ID               |
| ID    | `decode_unit`  | `control_unit` decodes; `reg_file` reads two sources; fills ID/EX |
| EX    | `execute_unit` | forwarding; ALU, or base + offset for LD/ST; fills EX/ST      |
| ST    | `store_unit`   | data memory or I/O access; write-back; status; halt           |

Memory is accessed in ST, because the paper has no separate memory stage.

The control unit produces eight control signals: `reg_write`, `mem_read`,
`mem_write`, `arith_en`, `logic_en`, `shift_en`, `ea_en` (address
calculation) and `halt`. The paper says there are eight; this particular
set is this design's.

**Hazards.** An instruction can read a register that one of the two
instructions ahead of it writes.

- Written by the instruction directly ahead: that instruction is in ST
  while the reader is in EX. `execute_unit` then takes the ST result
  (ALU value or loaded word) instead of the stale operand. This is ST-to-EX
  forwarding.
- Written by the instruction two ahead: the register file passes a
  same-cycle write straight to its read ports (write-through).

Together these cover every case. With no branches in the ISA, the pipeline
never stalls and never flushes. The paper only states CPI = 1; the
forwarding and write-through are how this design achieves it.

The timing is fixed. Count cycles from the first clock edge after `reset`
goes low, starting at 0:

- the instruction at address k is in ST during cycle k + 3;
- any load or store shows on `addr` and `rd`/`wr` in that cycle;
- for a HLT at address N, `halt` is high from cycle N + 4.

Once HLT has been decoded, fetching stops and the PC freezes until reset.

## Ports and memory map

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1  | clock, rising edge |
| `reset`   | in  | 1  | synchronous, active high: PC, pipeline, registers, status, halt |
| `data`    | in  | 16 | value returned by a load from the I/O space |
| `addr`    | out | 13 | address of the load/store now in ST (0 otherwise) |
| `rd`/`wr` | out | 1  | a load / a store is in ST |
| `out`     | out | 16 | store data during a store; afterwards the last stored value |
| `halt`    | out | 1  | a HLT has completed |
| `status`  | out | 3  | `{carry, negative, zero}` |
| `ld_en`, `ld_sel`, `ld_addr`, `ld_data` | in | 1, 1, 13, 16 | loader write port |

`data`, `addr`, `out`, `rd`, `wr` and `halt` keep the names and widths of
the paper's top-level symbol.

The 13-bit address space is split by bit 12:

- `addr[12] = 0`: the 4096-word data RAM (`data_mem`);
- `addr[12] = 1`: I/O. A load there returns the `data` input in that
  cycle. Every store, to RAM or I/O, appears on `out`.

The program memory (`prog_mem`) holds 8192 instructions. The processor
only reads it; the loader port is its only write port. To load:

- set `ld_sel = 0` to write the program memory at `ld_addr`;
- set `ld_sel = 1` to write the data RAM at `ld_addr[11:0]`;
- load while `reset` is high, then release reset.

The memory sizes, the I/O split and the loader port are this design's own.
Memory contents are not reset.

## How closely this follows the paper

Taken from the paper:

- 16-bit data and instructions;
- separate program and data memory;
- a load/store register machine;
- eight instructions;
- the four stages IF, ID, EX, ST and one instruction per clock;
- the ALU structure: arithmetic unit, logic unit, multiplexer;
- an arithmetic unit of adder, subtractor and Vedic multiplier;
- the reversible gate's equations;
- the 2-bit and 4-bit Vedic multipliers;
- the names of the top-level ports.

Differences and additions:

- **Data width.** One sentence of the paper calls the processor 4 bits
  wide. Everything else, including the top-level symbol, says 16 bits.
  16 bits is used.
- **Organisation.** The paper's synthesized schematic shows module names
  that suggest an accumulator machine with its own clock generator (an
  accumulator, a clock generator and a state machine). The paper's text
  describes a register-file pipeline, and that is what is built here.
  Nothing here corresponds to the accumulator or the clock generator.
- **Memory ports.** In the paper's simulation waveform, `addr` and `rd` also
  show instruction fetches. Here the program memory has its own internal
  port, so fetches and loads/stores can happen in the same cycle. `addr`,
  `rd` and `wr` show only data accesses.
- **Logic-unit select.** The paper's ALU diagram gives the logic unit a
  single select bit. Eight logic functions need three select bits here.
- **Division** is in the text but not in the arithmetic-unit diagram. It
  is built (see the ALU section) and shares the MUL opcode, selected by
  fn[0].
- **This design's own choices:** the encoding, the eight registers, the
  status bits, the memory sizes, the I/O mapping, the loader, forwarding
  and write-through, the halt behaviour, and the gate-level adder.
- **Multiplier carries.** The multiplier keeps the carries that the
  paper's 4-bit equations omit.

The paper reports FPGA results: 634 slices and 83 flip-flops for its
version. This RTL has 113 flip-flop bits outside the memories. Its memories
are 8192 x 16 bits of program, 4096 x 16 bits of data and 8 x 16 bits of
registers.

## Simulating

Each testbench is self-contained and prints
`TB_RESULT checks=N failures=M`. For example, for the whole processor:

```
verilator --binary --timing --assert -y rtl -Irtl rtl/risc_pkg.sv \
          tb/tb_risc.sv --top-module tb_risc
./obj_dir/Vtb_risc
```

Swap in any other `tb/tb_<module>.sv` and top module to test one block.

`tb_risc` runs the processor at its default size. Each of 12 random
programs does the following:

1. fill the whole data RAM and load the program (316 instructions);
2. run the program;
3. compare every port against an instruction-level reference model that is
   part of the testbench.

The comparison is made cycle by cycle:

- loads and stores: cycle, address and data;
- I/O load values;
- the status register;
- the exact cycle in which `halt` rises, which proves one instruction per
  clock.

Each program ends by storing all eight registers to I/O, so the final
register values are checked as well.

The testbench also counts how often each mechanism occurs, and fails if one
never does. It covers:

- forwarding and write-through;
- every opcode, division, every logic function and shift mode;
- RAM and I/O loads and stores;
- each status flag;
- halt, and reset between programs.

The block testbenches compare each unit with plain SystemVerilog operators:

- exhaustively for the gate, the 2-bit multiplier and the 4-bit
  multiplier;
- randomly for the 16-bit units.

## File map

| file | content |
|------|---------|
| `risc.sv` | top level, wires the stages and memories |
| `risc_pkg.sv` | widths, opcode/select enums, pipeline-register structs, instruction builders |
| `fetch_unit.sv`, `decode_unit.sv`, `control_unit.sv`, `execute_unit.sv`, `store_unit.sv` | pipeline stages |
| `reg_file.sv`, `prog_mem.sv`, `data_mem.sv` | storage |
| `alu.sv`, `arith_unit.sv`, `logic_unit.sv`, `barrel_shifter.sv` | ALU |
| `rev_gate.sv`, `rev_full_adder.sv`, `rev_adder.sv`, `rev_subtractor.sv`, `rev_divider.sv` | reversible-gate cells and the divider |
| `vedic_mul2.sv`, `vedic_combine.sv`, `vedic_mul.sv` | Vedic multiplier |
