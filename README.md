# MIPS-lite: a single-cycle processor for six MIPS instructions

This is a small 32-bit processor that runs a six-instruction subset of MIPS:
`addu`, `subu`, `ori`, `lw`, `sw` and `beq`. Every instruction finishes in
one clock cycle. A single datapath holds all the hardware any of the six
instructions needs. A purely combinational decoder sets the datapath's
multiplexers and write enables for the instruction being executed.

This is the classic textbook single-cycle organisation. It is deliberately
simple, with no pipelining, no hazards and no caches. Everything between
two clock edges is combinational, so the clock period must cover the
slowest instruction (`lw`).

## What the instructions do

| instruction        | format | register transfer                                               |
|--------------------|--------|-----------------------------------------------------------------|
| `addu rd,rs,rt`    | R      | `R[rd] <- R[rs] + R[rt]`, `PC <- PC+4`                          |
| `subu rd,rs,rt`    | R      | `R[rd] <- R[rs] - R[rt]`, `PC <- PC+4`                          |
| `ori rt,rs,imm16`  | I      | `R[rt] <- R[rs] \| zero_ext(imm16)`, `PC <- PC+4`               |
| `lw rt,imm16(rs)`  | I      | `R[rt] <- MEM[R[rs] + sign_ext(imm16)]`, `PC <- PC+4`           |
| `sw rt,imm16(rs)`  | I      | `MEM[R[rs] + sign_ext(imm16)] <- R[rt]`, `PC <- PC+4`           |
| `beq rs,rt,imm16`  | I      | if `R[rs] == R[rt]`: `PC <- PC+4 + (sign_ext(imm16) << 2)`, else `PC <- PC+4` |

Instruction fields (bit positions):

```
R-format:  op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
I-format:  op[31:26] rs[25:21] rt[20:16] imm16[15:0]
```

The encodings are the standard MIPS numbers: R-type `op = 0x00` with
`funct = 0x21` (`addu`) or `0x23` (`subu`); `ori` 0x0D, `lw` 0x23, `sw` 0x2B,
`beq` 0x04. Any other instruction is executed as a no-op: it writes nothing
and the PC advances by 4. `shamt` is ignored. Arithmetic wraps modulo 2^32,
and no overflow is detected, which is the MIPS meaning of `addu`/`subu`.

## One instruction, one cycle

Within a cycle the five classic phases happen one after another, as
combinational logic:

1. **Fetch.** The PC addresses the instruction memory. The instruction
   word appears after the memory's access time.
2. **Decode and register read.** The word is split into its fields. `op`
   and `funct` go to the control decoder. `rs` and `rt` address the two
   read ports of the register file (busA, busB).
3. **Execute.** The ALU adds, subtracts or ORs busA with either busB or the
   extended immediate. For `beq` it subtracts, and its `zero` output is the
   equality test.
4. **Memory.** The ALU result is the data-memory address. `sw` writes busB
   there, and `lw` reads from there.
5. **Write back.** The register file's write port takes either the ALU
   result or the memory data.

At the rising clock edge that closes the cycle, three updates happen
together: the register file is written (if RegWr), the data memory is
written (if MemWr) and the PC loads the next address. Each state element
is read combinationally and written only on a clock edge. So an instruction
always reads the register values left by the instructions before it, and
its own result is visible from the next cycle on.

## The datapath and its control points

```
            RegDst                                   ALUctr   MemWr     MemtoReg
       rd ─┐  │                                        │        │           │
       rt ─┴[mux]─RW                                   ▼        ▼           ▼
       rs ───────RA  RegFile  busA ───────────────▶ [ ALU ]──┬─▶Addr  Data ─▶[1 mux]──▶ busW
       rt ───────RB           busB ─┬─▶[0 mux]────▶ [     ]  │    Memory    [0    ]
                  ▲ busW            │  [1    ]        │ zero └──────────────▶
                  │                 │    ▲ ALUSrc     ▼
   imm16 ─▶[Extender]───────────────┼────┘          to fetch unit
              ▲ ExtOp               └──────────────▶ Data In
```

There are eight control signals. `control.sv` produces them, packed in the
`ctrl_t` struct:

| signal     | 0                 | 1                       |
|------------|-------------------|-------------------------|
| RegDst     | write `rt`        | write `rd`              |
| RegWr      | -                 | write the register file |
| ExtOp      | zero-extend imm16 | sign-extend imm16       |
| ALUSrc     | ALU B = busB      | ALU B = extended imm16  |
| ALUctr     | ADD / SUB / OR (2-bit enum) | |
| MemWr      | -                 | write data memory       |
| MemtoReg   | busW = ALU result | busW = memory data      |
| nPC_sel    | PC + 4            | branch (if zero)        |

Each instruction's register transfer fixes the settings below ("-" means
don't care; the decoder drives it as 0):

|       | RegDst | RegWr | ExtOp | ALUSrc | ALUctr | MemWr | MemtoReg | nPC_sel |
|-------|--------|-------|-------|--------|--------|-------|----------|---------|
| addu  | 1      | 1     | -     | 0      | ADD    | 0     | 0        | 0       |
| subu  | 1      | 1     | -     | 0      | SUB    | 0     | 0        | 0       |
| ori   | 0      | 1     | 0     | 1      | OR     | 0     | 0        | 0       |
| lw    | 0      | 1     | 1     | 1      | ADD    | 0     | 1        | 0       |
| sw    | -      | 0     | 1     | 1      | ADD    | 1     | -        | 0       |
| beq   | -      | 0     | -     | 0      | SUB    | 0     | -        | 1       |

Note two points about this table:

* `ori` zero-extends its immediate, while `lw`/`sw` sign-extend theirs.
  The two kinds of immediate share one Extender, so ExtOp exists.
* `sw` needs no control signal of its own for the data written. busB is
  wired permanently to the memory's Data In, and MemWr alone decides
  whether it is stored.

## Next-address logic (the fetch unit)

The fetch unit holds the PC, the instruction memory and the logic that
picks the next PC:

```
PC+4     = PC + 4                                      (adder 1)
target   = PC+4 + {sign_ext(imm16), 2'b00}             ("PC Ext", adder 2)
next PC  = (nPC_sel AND zero) ? target : PC+4          (AND gate, 2:1 mux)
```

The branch target is relative to the *following* instruction. The offset
counts instructions, not bytes, so `beq $0,$0,-1` is a one-instruction
infinite loop and `beq ...,+1` skips one instruction. The AND gate means
that only a `beq` (nPC_sel = 1) whose ALU subtraction gave zero
(`R[rs] == R[rt]`) redirects the PC:

| nPC_sel | zero | mux select |
|---------|------|------------|
| 0       | 0    | 0          |
| 0       | 1    | 0          |
| 1       | 0    | 0          |
| 1       | 1    | 1          |

## Storage elements

* **Register file:** 32 x 32 bits, with two combinational read ports (RA
  to busA, RB to busB) and one write port (busW into RW on the rising edge
  when the write enable is 1). Register 0 always reads 0 and ignores
  writes, as MIPS `$zero` does. A third read port (`dbg_ra`/`dbg_rdata`)
  exposes the registers for testing.
* **Memories:** there are separate instruction and data memories, each an
  idealised memory. A read is combinational: the address goes in and the
  data comes out after the access time. Only a write uses the clock. Both
  hold 256 words of 32 bits by default (`IMEM_WORDS`, `DMEM_WORDS`). They
  are byte-addressed with word granularity: address bits [1:0] are
  ignored, and the bits above the word index wrap around. Only whole-word
  accesses exist. Memory contents are not reset.
* **Register:** an N-bit register with a write enable, used for the PC.

## Top-level interface (`mips_lite_cpu`)

| port                           | dir | width | meaning |
|--------------------------------|-----|-------|---------|
| `clk`                          | in  | 1     | clock; all state changes on the rising edge |
| `rst_n`                        | in  | 1     | synchronous active-low reset: PC and all registers to 0 |
| `run`                          | in  | 1     | 1 = execute one instruction per clock; 0 = freeze the PC, the register file and the data memory |
| `imem_load_we/addr/data`       | in  | 1/32/32 | write one word into the instruction memory per clock (program loading) |
| `pc`, `instr`                  | out | 32    | current PC and the instruction it points to |
| `dbg_ra` / `dbg_rdata`         | in/out | 5/32 | combinational read of any register |

To use it: hold `rst_n` low (or `run` low) while the program is written
through the load port, then release reset with `run = 1`. The first
instruction executed is the one at address 0. A program can end in
`beq $0,$0,-1`, which keeps the PC on itself.

## Source files

| file | contents |
|------|----------|
| `rtl/mips_lite_pkg.sv` | widths, opcode/funct numbers, R/I-format structs, ALUctr enum, `ctrl_t` |
| `rtl/mips_lite_cpu.sv` | top: fetch unit + control + datapath |
| `rtl/instr_fetch_unit.sv` | PC register, instruction memory, next-address logic |
| `rtl/next_pc_logic.sv` | two adders, PC Ext, AND gate, next-PC mux |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | the two memories |
| `rtl/control.sv` | op/funct to control signals |
| `rtl/datapath.sv` | register file, extender, ALU, data memory and three muxes |
| `rtl/regfile.sv`, `rtl/alu.sv`, `rtl/extender.sv`, `rtl/adder.sv`, `rtl/mux2.sv`, `rtl/register.sv` | building blocks |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/mips_lite_iss_pkg.sv` | testbench support: instruction encoders and a reference instruction-set model |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mips_lite_pkg.sv tb/mips_lite_iss_pkg.sv tb/tb_mips_lite_cpu.sv \
  --top-module tb_mips_lite_cpu -Mdir obj_cpu
./obj_cpu/Vtb_mips_lite_cpu
```

For any other block, replace `tb_mips_lite_cpu` with `tb_<module>`. The
package files must come first; the remaining sources are found through
`-I`. The simulation is two-state, so the testbenches reset or preset
everything they read. `tb_datapath` and `tb_mips_lite_cpu` preset the data
memory through the hierarchy (`dut...u_dmem.mem`).

`tb_mips_lite_cpu` runs the CPU at its default sizes. It loads each
program through the load port and runs it to its final self-loop,
inserting random `run = 0` stall cycles. Every cycle it compares the PC
with a reference model. One clock after each register write it reads that
register back, which checks that an instruction completes in exactly one
cycle. Its programs are:

* A hand-written loop. It stores 5, 4, ..., 1 to memory, loads each value
  back and sums them. It then exercises negative offsets, a write to `$0`
  and a zero-extended `ori 0x8000`. The results (sum 15, `0 - 0x8000 =
  0xFFFF8000`) are checked against hand-computed values.
* Twelve random programs of 240 instructions that use all six
  instructions, with forward branches.

At the end it reports how often each mechanism happened: each
instruction, branch taken, branch not taken, negative offset, `ori` with
bit 15 set, write to `$0`, and stall. A mechanism that never happened
counts as a failure.

## Design choices not fixed by the source description

The datapath wiring, the control signals and their meanings, the
fetch-unit structure and the instruction semantics follow the description
this design was built from. The following are this implementation's own
choices:

* **Opcode/funct numbers:** standard MIPS values. The description names
  the instructions but not their encodings.
* **ALUctr encoding:** ADD = 0, SUB = 1, OR = 2.
* **Control decoder:** written as a case statement. The description
  defines what each signal must be per instruction, but leaves the logic
  equations open. Don't-cares are driven as 0, and unknown opcodes act as
  no-ops.
* **Reset, `run` and debug:** the reset, the `run` freeze input, the
  instruction-memory load port and the debug register port are additions
  for loading and observing programs.
* **Register 0:** hard-wired to zero, as in MIPS. The description only
  says "32 registers".
* **Memory sizes:** 256 words each, with addresses wrapping. No size is
  given. Raise `IMEM_WORDS`/`DMEM_WORDS` (powers of two) for larger
  programs.
* **Adder insides:** the adders are written as `+`. The classic
  construction is a chain of one-bit full adders, but synthesis is left
  to choose the carry structure.
* **Timing:** rising-edge clocking throughout.

Not included: AND and set-less-than in the ALU (they belong to the full
MIPS ALU, not to this subset), jumps, shifts, multiply/divide, byte
loads/stores, `bne`, caches, and any input/output devices.
