# MIPS-lite single-cycle CPU

A small processor that runs six instructions of the MIPS instruction set, one
instruction per clock cycle: `addu`, `subu`, `ori`, `lw`, `sw` and `beq`. The
point of the design is to show the single-cycle datapath plainly. The PC, the
register file and two memories are the only state. Everything between them is
combinational: fetch, register read, execute, memory access and write-back
all fit inside one clock period. At the clock edge the results are written
and the PC moves on.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable and lints
clean with Verilator apart from warnings about unused signal bits and
unused package constants. Every module has a
self-checking testbench.

## What each instruction does

| instruction        | format | effect                                                   | next PC |
|--------------------|--------|----------------------------------------------------------|---------|
| `addu rd, rs, rt`  | R      | `R[rd] = R[rs] + R[rt]`                                  | PC + 4 |
| `subu rd, rs, rt`  | R      | `R[rd] = R[rs] - R[rt]`                                  | PC + 4 |
| `ori rt, rs, imm`  | I      | `R[rt] = R[rs] \| zero_ext(imm)`                         | PC + 4 |
| `lw rt, imm(rs)`   | I      | `R[rt] = MEM[R[rs] + sign_ext(imm)]`                     | PC + 4 |
| `sw rt, imm(rs)`   | I      | `MEM[R[rs] + sign_ext(imm)] = R[rt]`                     | PC + 4 |
| `beq rs, rt, imm`  | I      | none                                                     | PC + 4 + (sign_ext(imm) << 2) if `R[rs] == R[rt]`, else PC + 4 |

Instruction fields (all instructions are 32 bits):

```
R:  op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
I:  op[31:26] rs[25:21] rt[20:16] imm16[15:0]
```

The encodings are the standard MIPS-I values, defined in `mipslite_pkg`:
R-type `op = 0` with `funct = 0x21` (addu) or `0x23` (subu), `ori = 0x0D`,
`lw = 0x23`, `sw = 0x2B`, `beq = 0x04`. The CPU does not implement jumps,
shifts or any other MIPS instruction. An instruction that is not one of the
six (any other opcode, or an R-type with another funct) runs as a no-op. It
writes nothing and does not branch, and the CPU raises the `illegal` output
for that cycle. There are no exceptions, and `addu`/`subu` wrap modulo 2^32.

## The datapath

```
            +-----------------------------+
            |  next address logic         |<---- branch & zero
            |  PC+4 | PC+4+(sext(imm)<<2) |
            +--------------^--------------+
                           |
  +----+   +--------------+|  instr   +--------+
  | PC |-->| instruction  |--------->| control|--> RegDst ALUSrc MemtoReg
  +----+   |   memory     |   |       +--------+    RegWr MemWr Branch ExtOp ALUctr
           +--------------+   |
               rs,rt,rd,imm16 |
                   v
  rd/rt --RegDst--> Rw  +-----------+ busA        +-----+  result  +--------+
                  rs -> | register  |------------>| ALU |--------->| data   |-- rdata
                  rt -> |   file    | busB  +---->|     |  zero    | memory |     |
                        |  32 x 32  |--+----|ALUSrc     |          +--------+     |
                        +-----------+  |    |     +-----+   ^ din = busB        |
                             ^         |  imm16 -> extender |                   |
                             |         +--------------------+                   |
                             +---- busW <---MemtoReg--- result / rdata ---------+
```

Instruction `i` goes through the datapath in one cycle:

1. **Fetch.** The instruction memory is read combinationally at the PC
   (`ifetch`).
2. **Decode and read.** `control` decodes `op`/`funct` into the control word.
   The register file reads `rs` onto busA and `rt` onto busB.
3. **Execute.** The ALU gets busA and either busB (R-type, `beq`) or the
   extended immediate (`ori`, `lw`, `sw`). The extender fills with zeros for
   `ori` and copies the sign bit for the other instructions.
4. **Memory.** The data memory is read at the ALU result all the time. It is
   written with busB only when `MemWr` is 1 (`sw`).
5. **Write-back.** busW is the ALU result, or the loaded word for `lw`. It goes
   to `rd` (R-type) or `rt` (I-type) when `RegWr` is 1.
6. **Next PC.** Two adders that belong to the fetch unit compute PC + 4 and
   the branch target. The main ALU never computes the PC. `beq` tests
   equality by subtracting in the ALU and looking at its `zero` output.

Control word for each instruction (`-` = don't care, decoded as 0):

| instr | RegDst | ALUSrc | MemtoReg | RegWr | MemWr | Branch | ExtOp | ALUctr |
|-------|--------|--------|----------|-------|-------|--------|-------|--------|
| addu  | 1 (rd) | 0      | 0        | 1     | 0     | 0      | -     | ADD    |
| subu  | 1 (rd) | 0      | 0        | 1     | 0     | 0      | -     | SUB    |
| ori   | 0 (rt) | 1      | 0        | 1     | 0     | 0      | zero  | OR     |
| lw    | 0 (rt) | 1      | 1        | 1     | 0     | 0      | sign  | ADD    |
| sw    | -      | 1      | -        | 0     | 1     | 0      | sign  | ADD    |
| beq   | -      | 0      | -        | 0     | 0     | 1      | sign  | SUB    |

The ALU also has AND and signed set-less-than. No instruction of the subset
uses them, but they are the other operations a full MIPS ALU needs. Its
`zero` flag is valid for every operation. The ALUctr encoding is AND `000`,
OR `001`, ADD `010`, SUB `110`, SLT `111`.

## Clocking and timing

All storage is written on the **falling** edge of `clk`: the PC
(`register_we`), the register file and both memories. Nothing is written on
the rising edge. Reads are combinational. A memory or the register file
behaves like a logic block whose output follows its address after an access
time. So one clock period must cover this whole path:

PC → instruction memory → register file read → extender/mux → ALU → data
memory read → MemtoReg mux → register file write setup.

It must also cover the branch path, PC → instruction memory → register read →
ALU zero → next-PC mux → PC setup. Because a single edge writes everything,
an instruction can read two registers and write a third in the same cycle.
It always reads the old values: the new value is written only at the end of
the cycle.

Apply inputs away from the falling edge; the testbenches change them just
after the rising edge. The outputs of `mipslite_cpu` describe the instruction
that is executing now, and they are stable before the next falling edge.

## Interface of `mipslite_cpu`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; state changes on its falling edge |
| `rst` | in | 1 | synchronous reset, active high. Holds PC at `RESET_PC` and blocks register, data-memory and branch effects |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 32, 32 | write one word of the instruction memory per cycle **while `rst` is 1** (byte address, word aligned) |
| `pc`, `instr` | out | 32, 32 | the current PC and the instruction word being executed |
| `reg_we`, `reg_waddr`, `reg_wdata` | out | 1, 5, 32 | the register write this cycle (`reg_we` is 0 for a write to register 0) |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | out | 1, 32, 32 | the data memory write this cycle |
| `branch_taken` | out | 1 | `beq` found its operands equal |
| `illegal` | out | 1 | the instruction is not one of the six |

Parameters: `IMEM_ADDR_BITS` and `DMEM_ADDR_BITS` (default 10, which gives
1024 words of 32 bits each) and `RESET_PC` (default 0).

To start a program: hold `rst` high, write the program through the `prog_*`
port, then release `rst`. The first instruction runs in the cycle after the
release. Registers and data memory are not cleared by reset. A program must
write a location before it reads it.

Addressing is in bytes, as in MIPS. Both memories ignore address bits 1:0 and
every bit above the word index. A 1024-word memory therefore repeats every
4 KiB of address space, and a misaligned `lw`/`sw` accesses the word that
contains the address. Register 0 always reads as zero, and writes to it are
dropped.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/mipslite_pkg.sv` | package | opcodes, funct codes, ALU and extender enums, instruction-format structs, the control-word struct `ctrl_t` |
| `rtl/mipslite_cpu.sv` | `mipslite_cpu` | top: the single-cycle datapath and its three multiplexers |
| `rtl/ifetch.sv` | `ifetch` | PC register, next address logic, instruction memory, program-load path |
| `rtl/next_addr_logic.sv` | `next_addr_logic` | PC + 4 and branch target, selected by `branch & zero` |
| `rtl/control.sv` | `control` | decoder from `op`/`funct` to the control word |
| `rtl/regfile.sv` | `regfile` | 32 x 32 register file: 2 combinational read ports, 1 write port written at the clock edge |
| `rtl/alu.sv` | `alu` | ADD/SUB/OR/AND/SLT with `zero`. Add and subtract share one adder (A + ~B + 1) |
| `rtl/adder.sv` | `adder` | W-bit adder with carry in/out |
| `rtl/mux2.sv` | `mux2` | W-bit 2:1 multiplexer (`sel = 0` → `a`) |
| `rtl/extender.sv` | `extender` | 16 → 32-bit sign or zero extension |
| `rtl/ideal_mem.sv` | `ideal_mem` | word memory, combinational read, write at the clock edge; used for both instruction and data memory |
| `rtl/register_we.sv` | `register_we` | N-bit register with write enable and synchronous reset (used for the PC) |

The instruction memory and the data memory are separate arrays. A
single-cycle machine has to fetch an instruction and access data in the same
cycle, and each idealized memory has only one address port.

## Verification

Each module has a testbench `tb/tb_<module>.sv`. Each compares the module
against a reference computed inside the testbench, prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends the run and counts
a failure if the test hangs.

- `tb_adder`, `tb_mux2`, `tb_extender`, `tb_alu`, `tb_next_addr_logic`,
  `tb_control`: corner cases and random or exhaustive input sweeps against
  SystemVerilog operators. The extender sweeps all 2^16 immediates in both
  modes. The decoder is tried on all 64 opcodes.
- `tb_register_we`, `tb_ideal_mem`, `tb_regfile`: check that a write lands
  only at a falling edge with the enable set, that reads are combinational,
  and that register 0 stays zero.
- `tb_ifetch`: a random program in a 64-word memory, run with random
  branch/zero inputs. PC and instruction word are checked every cycle. Load
  writes attempted while running must be ignored.
- `tb_mipslite_cpu` is the end-to-end test, at the default sizes. It assembles
  a program and loads it through the program port: a directed section, then
  600 random instructions. It runs the program against an instruction-level
  model kept in the testbench, comparing PC, instruction, register write,
  memory write, branch and illegal outputs every cycle. It checks that every
  falling edge retires one instruction. It counts each mechanism and fails
  if one never occurs: each instruction, branch taken and not taken, backward
  branch, write to register 0, unknown instruction, negative load/store
  offset, and `ori` with immediate bit 15 set. The program ends in
  `beq r0, r0, -1`; the test checks that the PC stays there.

Running one testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mipslite_pkg.sv tb/tb_mipslite_cpu.sv --top-module tb_mipslite_cpu -o sim
./obj_dir/sim
```

Replace `mipslite_cpu` with any module name for its unit test.

## Design choices beyond the basic datapath

These points are fixed by this implementation, not by the MIPS-lite datapath
itself:

- Opcode/funct values: standard MIPS-I. The ALUctr encoding is the common
  3-bit textbook form.
- Memory depths: 1024 words each. Upper address bits are ignored.
- The falling-edge clocking of all state.
- A synchronous reset for the PC only, plus a program-load port into the
  instruction memory that works during reset. An idealized memory has no
  other way to be filled.
- Register 0 is hardwired to zero (the MIPS `$zero` convention).
- Unknown instructions run as no-ops and raise a flag.
- The ALU has AND and SLT although the subset does not use them.
- The `carry_out` of the adders is unused. `addu`/`subu` ignore carries and
  overflow.
- The decoder is one combinational case statement, not split into a main
  decoder and a separate ALU decoder. An assertion checks that each decoded
  instruction has exactly one kind of effect.

To add an instruction, extend the `case` in `control.sv` and, if it needs
one, the ALU operation list in `mipslite_pkg`. An instruction that needs a
new source for busW or for the next PC also needs a new multiplexer input in
`mipslite_cpu.sv` or `next_addr_logic.sv`.
