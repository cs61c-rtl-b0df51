# Single-cycle MIPS-subset processor

This processor runs every instruction in one clock cycle. It covers seven
MIPS instructions: `add`, `sub`, `ori`, `lw`, `sw`, `beq` and `j`. In each
cycle the same things happen:

1. The PC addresses the instruction memory.
2. The main control turns the instruction into a set of control signals.
3. The datapath reads two registers and computes in the ALU. For `lw` and
   `sw` it also accesses the data memory.
4. At the next rising edge, the register file (or the data memory) and the
   PC are written together.

Nothing is pipelined and nothing stalls. The clock period must cover the
slowest instruction, which is `lw`. Its path is: PC clock-to-out, then the
instruction-memory read, the register-file read, the 32-bit ALU add, the
data-memory read, and finally register-file write setup.

The design splits into **control**, which only decodes, and the **datapath**
and **instruction fetch unit**, which only obey. The hard part is the control
table, so most of this document is about it.

## Instruction formats

```
         31    26 25   21 20   16 15   11 10    6 5      0
R-type  |  op    |  rs   |  rt   |  rd   | shamt |  funct |   add, sub
I-type  |  op    |  rs   |  rt   |     immediate (16)     |   ori, lw, sw, beq
J-type  |  op    |            target address (26)          |   j
```

| instr | op     | funct  | effect                                             |
|-------|--------|--------|----------------------------------------------------|
| add   | 000000 | 100000 | R[rd] = R[rs] + R[rt]                              |
| sub   | 000000 | 100010 | R[rd] = R[rs] - R[rt]                              |
| ori   | 001101 | –      | R[rt] = R[rs] OR ZeroExt(imm16)                    |
| lw    | 100011 | –      | R[rt] = MEM[R[rs] + SignExt(imm16)]                |
| sw    | 101011 | –      | MEM[R[rs] + SignExt(imm16)] = R[rt]                |
| beq   | 000100 | –      | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)·4  |
| j     | 000010 | –      | PC = {PC[31:28], target, 00}                       |

Every instruction other than `beq` and `j` sets PC = PC + 4.

## Control: from opcode to control points

`main_control` is purely combinational. It reads `op` (bits 31:26) and `funct`
(bits 5:0) and drives one `ctrl_t` struct (defined in `mips_pkg`):

| signal     | meaning                                   | add | sub | ori | lw  | sw  | beq | j   |
|------------|-------------------------------------------|-----|-----|-----|-----|-----|-----|-----|
| RegDst     | 1: write rd, 0: write rt                  | 1   | 1   | 0   | 0   | x   | x   | x   |
| ALUSrc     | 1: extended immediate, 0: busB            | 0   | 0   | 1   | 1   | 1   | 0   | x   |
| MemtoReg   | 1: busW from memory, 0: from ALU          | 0   | 0   | 0   | 1   | x   | x   | x   |
| RegWr      | write register file                       | 1   | 1   | 1   | 1   | 0   | 0   | 0   |
| MemWr      | write data memory                         | 0   | 0   | 0   | 0   | 1   | 0   | 0   |
| nPC_sel    | instruction is a branch                   | 0   | 0   | 0   | 0   | 0   | 1   | 0   |
| Jump       | instruction is a jump                     | 0   | 0   | 0   | 0   | 0   | 0   | 1   |
| ExtOp      | 1: sign-extend, 0: zero-extend            | x   | x   | 0   | 1   | 1   | x   | x   |
| ALUctr     | ALU operation                             | add | sub | or  | add | add | sub | x   |

Points to note:

- **Don't-cares.** Each `x` entry is driven as 0. Any value would be correct,
  because the datapath ignores the signal in that instruction. For example,
  RegDst does not matter when RegWr is 0. A hand-minimised decoder could use
  the don't-cares to shrink the logic. A synthesis tool gets the same freedom
  only where the `x` entries are left unassigned.
- **Branches.** `nPC_sel` says "this is a branch"; it is not the select of the
  next-PC mux. The fetch unit ANDs it with the ALU's `Zero` output. For `beq`
  the ALU subtracts, so `Zero` is 1 exactly when R[rs] == R[rt].
- **Jumps.** `Jump` acts on its own mux, placed after the branch mux, so it
  overrides whatever the branch logic picks.
- **Undefined instructions.** An opcode outside the table, or an R-type
  instruction with a `funct` other than add/sub, writes nothing and falls
  through to PC + 4. It behaves as a no-op.
- **ALU encoding.** The ALUctr encoding is `010` add, `110` subtract, `001` or
  (the `alu_ctr_e` enum). Only the three operations are given by the
  instruction set. The bit patterns are this design's choice.

## Instruction fetch unit

`ifetch_unit` holds the 32-bit PC and contains the instruction memory. It
computes the next PC as follows:

```
pc_plus4  = PC + 4
br_target = pc_plus4 + {SignExt(imm16), 00}          // second adder
seq_pc    = (nPC_sel & Zero) ? br_target : pc_plus4   // nPC mux
next_pc   = Jump ? {PC[31:28], target, 00} : seq_pc   // Jump mux
```

- The branch offset is relative to PC + 4. It counts words, so it reaches
  ±32 Ki instructions.
- The jump target keeps the upper four bits of the *current* PC. Standard
  MIPS takes them from PC + 4. The two differ only for a jump in the last word
  of a 256 MiB region.
- Every source of the next PC has its two low bits at 0, so the PC stays word
  aligned. An assertion in the top level checks this.
- On reset (synchronous, active high) the PC goes to 0.

## Datapath

`datapath` wires the following parts together:

- **Register file** (`reg_file`): 32 × 32 bits. It has two combinational read
  ports, busA = R[rs] and busB = R[rt]. Its one write port stores busW into
  R[Rw] at the rising edge when RegWr is 1.
  - A read in the same cycle as a write returns the old value.
  - Register 0 always reads 0 and ignores writes.
  - Reset clears all 32 registers. Real MIPS does not do this; it is here so
    that simulations start from a known state.
- **RegDst mux** (5 bits): Rw = RegDst ? rd : rt.
- **Extender** (`extender`): zero- or sign-extends imm16, as ExtOp selects.
- **ALUSrc mux**: the ALU's B input is either the extended immediate or busB.
- **ALU** (`alu`): add, subtract or or. `Zero` is 1 when the result is 0.
  Overflow is ignored; results wrap.
- **Data memory** (`data_mem`): combinational read, written at the clock edge
  when MemWr is 1. The address comes from the ALU result and the write data
  from busB.
- **MemtoReg mux**: busW is either the ALU result or the loaded word.

Both memories are "ideal": they read combinationally within the cycle. Each
holds 2**AW words of 32 bits (`IMEM_AW` and `DMEM_AW`, both 10, so 4 KiB
each). The word is selected by byte-address bits [AW+1:2]. The other address
bits are ignored, so the low two bits do not matter and higher addresses
alias. These sizes and the aliasing are this design's choices. The
combinational read keeps the design truly single-cycle, but it maps to
flip-flops or LUT RAM rather than to a synchronous-read SRAM macro.

## Top level: `single_cycle_cpu`

| port                                 | dir | meaning                                               |
|--------------------------------------|-----|-------------------------------------------------------|
| `clk`, `rst`                         | in  | clock (rising edge) and synchronous reset             |
| `imem_we`, `imem_waddr`, `imem_wdata`| in  | load port for the instruction memory (word address)   |
| `pc`, `instr`                        | out | current PC and the instruction being executed         |
| `reg_we`, `reg_waddr`, `reg_wdata`   | out | register write of this cycle (RegWr, Rw, busW)        |
| `mem_we`, `mem_addr`, `mem_wdata`    | out | data-memory write of this cycle (MemWr, address, data)|

The processor never writes its instruction memory. The load port exists only
to put a program there, normally while `rst` is held. The observation outputs
show what each instruction does, in the cycle it executes.

Three concurrent assertions state rules that the control table guarantees:

- the PC stays word aligned;
- no instruction writes both a register and memory;
- no instruction is both a branch and a jump.

## Files

| file                   | contents                                          |
|------------------------|---------------------------------------------------|
| `rtl/mips_pkg.sv`      | opcodes, function codes, ALUctr enum, `ctrl_t`    |
| `rtl/single_cycle_cpu.sv` | top level                                      |
| `rtl/ifetch_unit.sv`   | PC, next-PC logic, instruction memory             |
| `rtl/inst_mem.sv`      | instruction memory with load port                 |
| `rtl/main_control.sv`  | control decoder                                   |
| `rtl/datapath.sv`      | datapath                                          |
| `rtl/reg_file.sv`, `rtl/alu.sv`, `rtl/extender.sv`, `rtl/data_mem.sv`, `rtl/mux2.sv` | datapath parts |
| `tb/tb_<module>.sv`    | one self-checking testbench per module            |

## Simulation

Each testbench checks its module against values it computes itself. Each one
ends by printing `TB_RESULT checks=N failures=M`. To build and run a
testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mips_pkg.sv tb/tb_single_cycle_cpu.sv --top-module tb_single_cycle_cpu
./obj_dir/Vtb_single_cycle_cpu
```

The same command works for any testbench: substitute its name.

`tb_single_cycle_cpu` runs the processor at its default sizes. It loads a
1024-word program, then resets the processor and runs 40 000 cycles, twice.
The program has three parts:

1. a loop that clears the data memory;
2. a directed sequence with known results: an add, a subtract with a
   negative result, an ori with a zero-extended immediate, a load after a
   store with a negative offset, a branch not taken and one taken, a write
   to register 0, an undefined opcode and a jump;
3. a random section, whose branches and jumps stay inside it.

An instruction-level model in the testbench runs the same program in
lockstep. Every cycle it compares the PC, the instruction, and the register
and memory writes with the model, so an instruction that took more or less
than one cycle would show up. The testbench also counts how often each
instruction kind, taken and not-taken branches, register-0 writes and
undefined instructions occur. A count of zero is a failure.

The unit testbenches cover the following:

- the ALU on random operands;
- both extension modes;
- the register file: read-old-on-write, register 0, and reset;
- both memories at random byte addresses;
- every row of the control table, plus undefined opcodes;
- the fetch unit under random nPC_sel / Zero / Jump;
- the datapath on a random stream of add, sub, ori, lw, sw and beq.

## Where this design makes its own choices

Everything below fills a gap in the instruction-set description; none of it
is an alternative to it:

- Reset clears the PC and all registers.
- Memory sizes are 4 KiB each, and addresses alias.
- The instruction memory has a load port.
- ALUctr uses the bit encoding given above.
- Don't-care control outputs are 0, and undefined instructions act as
  no-ops.
- Arithmetic overflow is not detected.
- The upper bits of a jump target come from the current PC rather than from
  PC + 4.
