# A single-cycle microprocessor for a small MIPS-style instruction set

A datapath unit (DPU) is easy to drive by hand: raise the enable of one
functional unit, set its function bits, give the register addresses, and one
clock edge later the result sits in the register file. Nobody wants to write
programs that way. This design puts an instruction set in front of the DPU.
A 32-bit machine instruction holds a 6-bit **opcode** and register or
immediate fields. A ROM decodes the opcode into the DPU's control signals, and
the fields drive the register-file addresses directly. Everything an
instruction does, including a memory access, happens in one clock cycle.

```
 instr_in ──► [instruction register] ──opcode[31:26]──► [opcode ROM 64 x 16] ──ctrl──┐
                 │ Z[25:21]  X[20:16]  Y[15:11]  imm[15:0]                             │
                 ▼                                                                     ▼
          ┌──────────────────────────── DPU ──────────────────────────────────────────────┐
          │ 32x32 register file ─X bus──►┌ AU (add/sub)  ┐                               │
          │        ▲            ─Y bus──►├ LU (4-bit lf) ├─ OR ─┐                        │
          │        │   sign-ext imm ─►Y  └ SU (2-bit st) ┘      ├─► Z bus ──► Zdi        │
          │        └────────────── Z bus ◄─ memory read data ───┘  (msel & ld_en)        │
          │ address = AU result, store data = register Y output                          │
          └─────────────────────────────────────────────────┬────────────────────────────┘
                                                            ▼
                                                     [data memory M]
```

## Instruction formats

Both formats share the first three fields. The instruction register holds one
word and presents all fields at once. Which fields matter is up to the
decoder.

| bits   | 31..26 | 25..21 | 20..16 | 15..0                          |
|--------|--------|--------|--------|--------------------------------|
| R-form | opcode | Z      | X      | Y in 15..11, 10..0 unused      |
| I-form | opcode | Z      | X      | 16-bit immediate               |

Assembly is written `op $Z, $X, $Y` or `op $Z, $X, imm`: destination first,
then sources. For example, `add $10, $8, $9` means R10 = R8 + R9. Loads and
stores use `lw $Z, off($X)` and `sw $Z, off($X)`. For a store, Z names the
register whose value is written to memory, not a destination.

The immediate is always **sign-extended** from 16 to 32 bits. This holds for
the logic immediates too: `andi $1, $2, 0xFFFF` masks with all ones. MIPS
itself would zero-extend there.

Register 0 is the constant `$zero`. It always reads 0, and writes to it are
dropped. The other names (`$v0`, `$a0`, `$sp`, …) are software conventions
only. The hardware treats registers 1..31 alike.

## Opcode map and the control ROM

The ROM (`opcode_rom`) has 64 words, one for each opcode value. Each word is
the `isa_pkg::ctrl_t` struct, listed here from MSB to LSB:

| field  | bits | meaning |
|--------|------|---------|
| rwe    | 1 | write the Z bus into register Z at the end of the cycle |
| imm_en | 1 | put the sign-extended immediate on the Y bus instead of register Y |
| au_en  | 1 | arithmetic unit drives the Z bus |
| a_s    | 1 | 0 add, 1 subtract |
| lu_en  | 1 | logic unit drives the Z bus |
| lf     | 4 | logic function, as a truth table (see below) |
| su_en  | 1 | shift unit drives the Z bus |
| st     | 2 | shift type: 00 shift left logical, 01 shift right arithmetic, 10 rotate right, 11 pass |
| st_en  | 1 | store path enabled |
| ld_en  | 1 | load path enabled |
| rw     | 1 | memory direction, 1 read / 0 write |
| msel   | 1 | Z bus source: 0 functional units, 1 memory |

The ROM contents are computed at elaboration from a `case` over the opcodes.
No data file is involved. To add an instruction, add an enum value in
`isa_pkg` and a row in `rom_word()`.

| instruction | opcode | source of the value |
|-------------|--------|---------------------|
| nop  | 000000 | MIPS |
| add  | 100000 | MIPS |
| sub  | 100010 | MIPS |
| and  | 100100 | MIPS |
| or   | 100101 | MIPS |
| lw   | 100011 | MIPS |
| sw   | 101011 | MIPS |
| addi | 001000 | MIPS |
| xor  | 100110 | this design (MIPS function code) |
| sl   | 000100 | this design |
| sa   | 000111 | this design |
| rot  | 000110 | this design |
| subi | 001001 | this design |
| andi | 001100 | this design (MIPS value) |
| ori  | 001101 | this design (MIPS value) |
| xori | 001110 | this design (MIPS value) |
| sli  | 000001 | this design |
| sai  | 000011 | this design |
| roti | 000010 | this design |

Every other opcode decodes to the nop word. Nothing is written, no unit is
enabled, and the memory is not written. There is no illegal-instruction
trap.

**Logic function `lf`.** Result bit i is `lf[{x[i], y[i]}]`. This gives
AND = 1000, OR = 1110 and XOR = 0110. The other 13 two-input functions are
available to any new opcode without changing the logic unit.

**Shifts.** The amount is the low 5 bits of the Y operand (register or
immediate), so it is taken modulo 32. "Logical" shifts left, "arithmetic"
shifts right with the sign, and "rotate" rotates right. The ISA only names
the three kinds, so these directions are this design's choice.

## The datapath

`dpu` wires the register file, the immediate path and the three functional
units:

* **X bus** = register file port X (`x_ra` = X field).
* **Y bus** = register file port Y (`y_ra` = Y field), or the sign-extended
  immediate when `imm_en` is set (`imm_sext`).
* **AU, LU, SU** all compute every cycle. A disabled unit outputs zero, and
  the **Z bus** is the OR of the three. This replaces the enabled bus drivers
  of a tri-state bus. The ROM never enables two units at once, and an
  assertion in `dpu` checks this during simulation.
* For a load (`msel` and `ld_en`), the memory read data replaces the unit
  result on the Z bus.
* The Z bus goes back to the register file write port and is written at the
  next rising edge when `rwe` is set.

### Loads and stores

A memory access needs base + offset, and the AU already adds X to the Y bus.
So `lw` and `sw` enable the AU with the immediate on the Y bus, and the AU
result is the memory address. With offset 0 this is just the X register.

A store needs a second register value while the Y bus carries the offset.
Store data is therefore taken from the register file's Y output, ahead of the
immediate multiplexer. The top switches the Y read address from the Y field
to the Z field when `st_en` is set. This matches the `sw $Z, off($X)` syntax.

The memory write enable is `st_en & ~rw`. `data_mem` is byte-addressed with
word accesses only. Address bits 1..0 are ignored, and addresses beyond its
size (256 words by default) wrap around. It reads asynchronously, so a load
completes within its own cycle.

## Timing

```
edge k   : instruction register captures instr_in (instr_ld = 1)
cycle k  : ROM decodes, DPU computes; wb_en/wb_addr/wb_data and mem_* show it
edge k+1 : register file (and memory, for sw) written; next instruction captured
```

One instruction is accepted per clock. An instruction loaded at edge k can
use the result of the instruction loaded at edge k-1. There are no hazards,
because each instruction finishes before the next one starts.

In a cycle with `instr_ld = 0`, the instruction register loads a nop.
Without that, the held instruction would run again every cycle. Reset is
synchronous and active low. It clears the instruction register (to nop) and
all 32 registers. The data memory is not reset.

There is no program counter, instruction memory or branching. Instructions
are supplied from outside, one per `instr_ld` pulse. The ISA as described
has no branch or jump instructions.

## What is specified and what is this design's choice

These parts follow the ISA description:

* the 32-bit formats and field positions;
* the 6-bit opcode into a ROM of control words;
* the control word's fields, their order and widths;
* the opcode values of add, sub, and, or, lw, sw, addi and nop;
* the control word of add (AU enabled, a/s = 0, all else off, rwe = 1);
* the 32 x 32 register file with `$zero`;
* the 16-bit sign-extended immediate.

These are this design's own choices:

* the remaining eleven opcode values;
* every ROM row other than add;
* the meaning of the `lf` and `st` codes;
* the shift directions;
* the r/w polarity (the add row leaves r/w as don't-care; the ROM stores 1);
* address = AU result, instead of the X bus directly, so that offsets work;
* store data from the Z-named register;
* the nop-on-idle instruction register;
* the reset behaviour;
* the memory size and addressing;
* the OR-combined Z bus.

An earlier sketch of the datapath carried a 32-bit immediate into an
"immediate register". This design follows the 16-bit sign-extended form
that matches the I-format.

## Files

| file | module |
|------|--------|
| `rtl/isa_pkg.sv`    | opcodes, `ctrl_t`, shift types, field helpers |
| `rtl/isa_cpu.sv`    | top: instruction register + ROM + DPU + data memory |
| `rtl/instr_reg.sv`  | instruction register, R/I field split |
| `rtl/opcode_rom.sv` | opcode → control word |
| `rtl/dpu.sv`        | datapath |
| `rtl/reg_file.sv`   | 32 x 32 register file, 2 read / 1 write, R0 = 0 |
| `rtl/imm_sext.sv`   | immediate sign extension and Y-bus mux |
| `rtl/arith_unit.sv` | AU |
| `rtl/logic_unit.sv` | LU |
| `rtl/shift_unit.sv` | SU |
| `rtl/data_mem.sv`   | data memory |

Top parameters: `DMEM_WORDS` (default 256). `reg_file`, the units and
`data_mem` take `WIDTH`/`DEPTH`/`WORDS` parameters. The ISA widths themselves
are constants in `isa_pkg`.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the module with an independent model, stops itself with a watchdog,
and prints `TB_RESULT checks=N failures=M`.

`tb_isa_cpu` runs the whole processor at its default size. It has a small
assembler and an instruction-level model of registers and memory. It runs:

* the example sequence `add $10,$8,$9 / xor $13,$11,$12 / lw $15,0($16)`;
* an `addi / sw 4($0) / lw 4($0)` round trip;
* 20 000 random instructions, including idle cycles and unassigned opcodes;
* a store of every register.

Each cycle, it checks the write-back and memory ports against the model. It
also counts every opcode and each special case: a write to R0, a negative
immediate, a load from an address just stored to, a back-to-back dependence,
an idle cycle, an unassigned opcode, and a shift amount of 32 or more. The
test fails if any of these never happened.

To simulate with Verilator 5:

```
verilator --binary --timing --assert rtl/isa_pkg.sv rtl/*.sv tb/tb_isa_cpu.sv \
          --top tb_isa_cpu -o sim && ./obj_dir/sim
```

For a single block, list `rtl/isa_pkg.sv`, the block's file and the files of
its submodules, plus its testbench. The whole CPU test finishes in well under
a second.

## Limits

* No program counter, branches, jumps, instruction memory, interrupts or
  exceptions.
* No carry or overflow flags. Addition and subtraction wrap modulo 2^32.
* Word-only memory accesses. Misaligned address bits are ignored, not
  trapped.
* The Z bus is a multiplexer, not a tri-state bus.
