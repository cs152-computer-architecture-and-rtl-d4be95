# MIPS-lite single-cycle processor

This is a 32-bit processor that runs every instruction in exactly one clock cycle
(CPI = 1). It supports a six-instruction subset of MIPS:

| instruction          | register transfer                                       |
|----------------------|---------------------------------------------------------|
| `addu rd, rs, rt`    | R[rd] ← R[rs] + R[rt]                                   |
| `subu rd, rs, rt`    | R[rd] ← R[rs] − R[rt]                                   |
| `ori  rt, rs, imm16` | R[rt] ← R[rs] \| ZeroExt(imm16)                         |
| `lw   rt, imm16(rs)` | R[rt] ← Mem[R[rs] + SignExt(imm16)]                     |
| `sw   rt, imm16(rs)` | Mem[R[rs] + SignExt(imm16)] ← R[rt]                     |
| `beq  rs, rt, imm16` | if R[rs] = R[rt] then PC ← PC + 4 + SignExt(imm16)·4    |

Every other instruction also sets PC ← PC + 4. Because each instruction finishes in one
cycle, the clock period must cover the slowest instruction, which is `lw`. Its path
runs through PC clock-to-Q, the instruction memory, the register file read, the 32-bit
ALU add, the data memory read, and the register-file setup, plus clock skew. The design
is the textbook single-cycle datapath. It is made of simple combinational parts and
three clocked parts: the PC, the register file and the data memory. All three update
on the same clock edge.

## Structure

```
single_cycle_cpu
├── ideal_memory  u_imem      instruction memory, read at PC
├── control       u_control   op, funct, Equal -> 8 control signals
└── datapath      u_datapath
    ├── mux2         u_regdst     Rw = RegDst ? rd : rt
    ├── regfile      u_regfile    32 x 32 bit, 2 read ports, 1 write port
    ├── extender     u_ext        imm16 -> 32 bits, zero or sign (ExtOp)
    ├── mux2         u_alusrc     ALU B = ALUSrc ? immediate : busB
    ├── alu          u_alu        add / sub / or, Equal = (result == 0)
    │   └── adder
    ├── ideal_memory u_dmem       data memory, address = ALU result, Data In = busB
    ├── mux2         u_memtoreg   busW = MemtoReg ? memory word : ALU result
    └── ifetch       u_ifetch     PC register and next-address logic
        ├── adder  (PC + 4)
        ├── adder  (PC + 4 + branch offset)
        ├── mux2   (nPC_sel)
        └── register (PC bits 31..2)
```

`mips_pkg` holds the following shared definitions:

- the instruction fields, as the `instr_t` struct;
- the opcodes and funct codes;
- the ALU operation enum `alu_ctr_t` (`ALU_ADD`, `ALU_SUB`, `ALU_OR`);
- the extension enum `ext_op_t` (`EXT_ZERO`, `EXT_SIGN`);
- the control bundle `ctrl_t`.

### Instruction formats

```
R:  op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
I:  op[31:26] rs[25:21] rt[20:16] immediate[15:0]
```

The rs, rt, rd and immediate fields go straight from the instruction word into the
datapath. Only op and funct pass through control. The encodings are the standard MIPS
ones:

| | op | funct |
|-|----|-------|
| addu | `000000` | `100001` |
| subu | `000000` | `100011` |
| ori  | `001101` | — |
| lw   | `100011` | — |
| sw   | `101011` | — |
| beq  | `000100` | — |

## Control: the part to read carefully

The control unit (`rtl/control.sv`) is purely combinational. Its only input from the
datapath is the condition **Equal**. Equal is the zero flag of the ALU, and the ALU
subtracts for `beq`, so Equal is high exactly when rs and rt hold the same value.
Control feeds Equal back as **nPC_sel**, so a taken branch is decided in the same cycle.

| signal   | meaning                          | addu | subu | ori  | lw   | sw   | beq   |
|----------|----------------------------------|------|------|------|------|------|-------|
| nPC_sel  | 0: PC+4, 1: branch target        | 0    | 0    | 0    | 0    | 0    | Equal |
| RegWr    | write the register file          | 1    | 1    | 1    | 1    | 0    | 0     |
| RegDst   | 0: rt, 1: rd                     | 1    | 1    | 0    | 0    | (1)  | (1)   |
| ExtOp    | zero or sign extension           | (sign) | (sign) | zero | sign | sign | (sign) |
| ALUSrc   | 0: busB, 1: immediate            | 0    | 0    | 1    | 1    | 1    | 0     |
| ALUctr   | ALU operation                    | add  | sub  | or   | add  | add  | sub   |
| MemWr    | write data memory                | 0    | 0    | 0    | 0    | 1    | 0     |
| MemtoReg | 0: ALU result, 1: memory word    | 0    | 0    | 0    | 1    | 0    | 0     |

Values in parentheses have no effect on that instruction. Control drives them anyway,
because it uses one equation per signal:

- RegWr = not (sw or beq)
- RegDst = not (lw or ori)
- ExtOp = zero for ori, sign otherwise
- ALUctr for R-format: sub if funct is subu, add otherwise

Instructions outside the subset follow the same equations. For example, an unknown
opcode adds the sign-extended immediate to rs and writes the sum to register rd. There
is no illegal-instruction trap.

For `beq`, ALUSrc is 0 (busB), so the comparison is rs against rt. A common shorthand
for this control is "ALUSrc = register for R-format, immediate otherwise". That rule
would make `beq` compare rs against the immediate, which contradicts the instruction's
definition. This design follows the definition.

## Timing and clocking

- **Clock.** There is one clock, and the rising edge updates every clocked element.
  Many drawings of this datapath show falling-edge storage. Only the active edge
  differs here; the requirement that all state changes on one edge is kept.
- **Instruction memory and register file.** Both read combinationally: an address
  change shows at the output after the access time. The clock matters only for
  writes. A register written in a cycle still reads its old value until that cycle's
  clock edge.
- **One-cycle execution.** An instruction is read at the PC, decoded and executed
  within one cycle. At the end of the cycle, the register write, the memory write and
  the new PC all take effect together.
- **Reset.** `rst` is synchronous and only sets PC to `RESET_PC` (default 0). The
  register file and the memories are not reset. Initialise any register or memory
  word before a program reads it.

## Memories

`ideal_memory` models an ideal memory: a combinational read and a write on the clock
edge. Instruction and data memory are separate instances of the same module.

- **Addressing.** Addresses are byte addresses. The word is `addr[ADDR_BITS+1:2]`, and
  the other address bits are ignored, so accesses wrap around.
- **Size.** Each memory is 2^10 words (4 KiB) by default. Set it with
  `IMEM_ADDR_BITS` and `DMEM_ADDR_BITS` on the top. The ideal memory has no natural
  size, so this default is a choice of this implementation.
- **Word access only.** Stores and loads move whole words, and the two low address
  bits are ignored. There is no alignment exception.

### Loading a program

The top has a program port: `prog_we`, `prog_addr` and `prog_data`. While `prog_we`
is high, the instruction memory is addressed by `prog_addr` rather than the PC, and
one word is written per clock. Hold `rst` high while loading, then release it.

## Top-level ports (`single_cycle_cpu`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous reset, PC ← `RESET_PC` |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 32, 32 | instruction-memory load port |
| `pc`, `instr` | out | 32, 32 | instruction executing this cycle |
| `reg_we`, `reg_waddr`, `reg_wdata` | out | 1, 5, 32 | register write that takes effect at the next edge |
| `mem_we`, `mem_addr`, `mem_wdata` | out | 1, 32, 32 | data-memory write that takes effect at the next edge |

The `reg_*` and `mem_*` outputs expose the internal write ports (RegWr/Rw/busW and
MemWr/address/Data In). They let a testbench or a trace tool follow execution.

Parameters: `IMEM_ADDR_BITS = 10`, `DMEM_ADDR_BITS = 10`, `RESET_PC = 0`.

## Choices this implementation makes

These are not fixed by the single-cycle design itself:

- **Numeric encodings.** The opcode and funct values are standard MIPS. The 2-bit
  `ALUctr` encoding is this implementation's own.
- **Register 0.** It always reads as zero and ignores writes, as MIPS requires.
  Set `ZERO_REG = 0` on `regfile` to get 32 ordinary registers.
- **Arithmetic.** `addu` and `subu` ignore overflow.
- **Subtraction.** The ALU subtracts with the same adder it adds with: B is inverted
  and the carry-in is 1.
- **Equal.** It is a zero-detect on the ALU result, not a separate comparator.
- **Branch offset.** The target is PC + 4 + offset·4, counted from the next
  instruction.
- **PC storage.** The PC register holds only bits 31..2. Bits 1..0 of `pc` are
  constant zero.
- **Reset, memory size and program-load port.** These are covered above.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/mips_pkg.sv rtl/*.sv \
          tb/tb_single_cycle_cpu.sv --top-module tb_single_cycle_cpu -Mdir obj
./obj/Vtb_single_cycle_cpu +verilator+rand+reset+2
```

Replace the testbench file and top name to run another block's test: `tb_adder`,
`tb_mux2`, `tb_alu`, `tb_register`, `tb_regfile`, `tb_extender`, `tb_ideal_memory`,
`tb_ifetch`, `tb_control` or `tb_datapath`.

### The end-to-end test

`tb_single_cycle_cpu` runs the processor with its default parameters. It generates a
program of about 770 instructions and loads it through the program port. It then runs
the processor in lock-step with an instruction-level reference model. Every cycle it
compares the PC, the instruction and both write ports. A single mismatch fails the
test, so the comparison also shows that each instruction takes exactly one cycle.

The program has four parts:

1. It initialises the registers and a 32-word data area.
2. It runs a counted loop, which exercises backward branches and not-taken branches.
3. It runs a random body of all six instructions, with forward branches.
4. It stops in a branch-to-self.

The test counts the following events and fails if any of them never happens:

- each of the six instructions;
- a taken `beq`;
- a not-taken `beq`;
- a backward branch;
- a negative load/store offset;
- a write to register 0 that is discarded.

`tb_datapath` drives the datapath directly, without the instruction memory or
control. It supplies the control signals from its own table and checks the datapath's
response to about 3000 random instructions.

## Limits

- Only the six instructions above are decoded. There are no jumps, shifts, other ALU
  operations, byte or halfword accesses, exceptions or interrupts.
- The memories are ideal. There is no wait state, so real instruction or data memory
  with a latency of more than zero cycles cannot be attached without changes.
- No timing figures are given or checked. The RTL fixes only the function and the
  one-instruction-per-cycle behaviour, not the cycle time.
