# A single-cycle MIPS-subset CPU and its PLA controller

This is a processor that finishes every instruction in exactly one clock
cycle. Fetch, decode, register read, ALU operation, memory access and
write-back all happen in one long combinational path between two clock
edges. At the edge that ends the cycle, the PC, the register file and the
data memory are all updated together. With no pipeline there are no hazards,
stalls or forwarding. What is left to design is the **control**: a
combinational function from the instruction's opcode (and funct field) to
the handful of signals that steer the datapath's multiplexers and write
enables.

The CPU runs seven instructions of the MIPS instruction set:

| instruction | format | op (funct) | register transfer |
|---|---|---|---|
| `add rd, rs, rt` | R | `00 0000` (`10 0000`) | R[rd] ← R[rs] + R[rt] |
| `sub rd, rs, rt` | R | `00 0000` (`10 0010`) | R[rd] ← R[rs] − R[rt] |
| `ori rt, rs, imm16` | I | `00 1101` | R[rt] ← R[rs] OR ZeroExt(imm16) |
| `lw rt, imm16(rs)` | I | `10 0011` | R[rt] ← MEM[R[rs] + SignExt(imm16)] |
| `sw rt, imm16(rs)` | I | `10 1011` | MEM[R[rs] + SignExt(imm16)] ← R[rt] |
| `beq rs, rt, imm16` | I | `00 0100` | if R[rs] = R[rt]: PC ← PC + 4 + SignExt(imm16)·4 |
| `j target` | J | `00 0010` | PC ← {PC[31:28], target, 00} |

Every instruction other than `beq` and `j` also does PC ← PC + 4.
Instruction fields: op = [31:26], rs = [25:21], rt = [20:16], rd = [15:11],
shamt = [10:6], funct = [5:0], imm16 = [15:0], target = [25:0].

## Structure

```
single_cycle_cpu
├── ifu              instruction fetch unit: PC, next-address logic
│   ├── imem         instruction memory (combinational read)
│   └── mux2 ×2      branch mux, jump mux
├── controller       main control, a two-level PLA
│   ├── ctrl_and_plane   opcode/funct → one line per instruction
│   └── ctrl_or_plane    instruction lines → control signals
└── datapath
    ├── mux2         RegDst: write register rt (0) or rd (1)
    ├── regfile      32 × 32-bit, 2 read ports, 1 write port
    ├── extender     imm16 → 32 bits, zero (ExtOp=0) or sign (ExtOp=1)
    ├── mux2         ALUSrc: ALU B input = busB (0) or immediate (1)
    ├── alu          ADD / SUB / OR, Zero flag
    ├── dmem         data memory (combinational read, clocked write)
    └── mux2         MemtoReg: write back ALU result (0) or memory word (1)
```

The types shared by these modules are in `cpu_pkg`. They are the opcode and
funct constants, the `aluctr_e` enum, the `terms_t` struct of instruction
lines and the `ctrl_t` struct of control signals.

## The control signals

| signal | 0 | 1 |
|---|---|---|
| `reg_dst` (RegDst) | write rt | write rd |
| `alu_src` (ALUSrc) | ALU B = busB | ALU B = extended imm16 |
| `mem_to_reg` (MemtoReg) | write back ALU result | write back memory word |
| `reg_write` (RegWr) | — | write the register file at the clock edge |
| `mem_write` (MemWr) | — | write the data memory at the clock edge |
| `npc_sel` (nPC_sel) | not a branch ("+4") | branch instruction ("br") |
| `jump` (Jump) | — | next PC is the jump target |
| `ext_op` (ExtOp) | zero-extend | sign-extend |
| `alu_ctr` (ALUctr) | `00` ADD, `01` SUB, `10` OR | |

The full control table, with `x` for don't-care:

| | add | sub | ori | lw | sw | beq | j |
|---|---|---|---|---|---|---|---|
| RegDst | 1 | 1 | 0 | 0 | x | x | x |
| ALUSrc | 0 | 0 | 1 | 1 | 1 | 0 | x |
| MemtoReg | 0 | 0 | 0 | 1 | x | x | x |
| RegWrite | 1 | 1 | 1 | 1 | 0 | 0 | 0 |
| MemWrite | 0 | 0 | 0 | 0 | 1 | 0 | 0 |
| nPC_sel | 0 | 0 | 0 | 0 | 0 | 1 | x |
| Jump | 0 | 0 | 0 | 0 | 0 | 0 | 1 |
| ExtOp | x | x | 0 | 1 | 1 | x | x |
| ALUctr | ADD | SUB | OR | ADD | ADD | SUB | x |

Each don't-care is safe because nothing downstream listens. A `sw` or `beq`
does not write a register, so neither the destination nor the write-back
source matters. An R-type instruction does not use the extender.

## Controller: the PLA

The controller is written as the two planes of a programmable logic array,
one module per plane.

**AND plane** (`ctrl_and_plane`). Each instruction is one product term over
the six opcode bits, for example
`lw = op5 · ~op4 · ~op3 · ~op2 · op1 · op0`. The two R-type instructions
share the all-zero opcode term (`rtype`), which is ANDed with a compare of
the funct field: `add = rtype · (funct = 10 0000)` and
`sub = rtype · (funct = 10 0010)`.

**OR plane** (`ctrl_or_plane`). Each control signal is the OR of the
instruction lines that need it high. Every don't-care is resolved to 0:

```
RegDst    = add + sub            ALUSrc   = ori + lw + sw
MemtoReg  = lw                   RegWrite = add + sub + ori + lw
MemWrite  = sw                   nPC_sel  = beq
Jump      = jump                 ExtOp    = lw + sw
ALUctr[0] = sub + beq            ALUctr[1] = ori
```

An opcode outside the subset, or an R-type funct other than add/sub, raises
no AND-plane line. All control signals are then 0: the instruction writes
nothing and the PC advances by 4. This is a choice of this design.

## Next-address logic

This is the one part of the datapath that is not a simple steer-by-mux. It
lives in `ifu`, and it is the part most worth reading closely.

The PC keeps only bits [31:2]; its two low bits are always 00. Each cycle
three candidates are formed:

- `pc_plus4    = PC + 4`
- `br_target   = PC + 4 + {SignExt(imm16), 00}`. The offset counts words
  from the instruction after the branch.
- `jump_target = {PC[31:28], target26, 00}`. The top four bits come from
  the current PC, so a jump stays within its 256 MiB region.

Two multiplexers choose among them:

1. **Branch mux**, select = `nPC_sel AND Zero`. `nPC_sel` only means "this
   is a branch instruction". The ALU, set to SUB by the controller, makes
   `Zero` = 1 exactly when R[rs] = R[rt]. Their AND is the mux select, so
   the branch is taken only for a `beq` whose registers are equal:

   | nPC_sel | Zero | select |
   |---|---|---|
   | 0 | x | 0 (PC+4) |
   | 1 | 0 | 0 (PC+4) |
   | 1 | 1 | 1 (branch target) |

   Zero changes with every instruction, so gating it with nPC_sel is what
   keeps an `add` with a zero result from branching.
2. **Jump mux**, select = `Jump`, placed after the branch mux, so it wins.
   During a `j` the ALU gets register values picked by instruction bits
   that belong to the target field, so `Zero` may well be 1. This is why
   the OR plane keeps `nPC_sel` = 0 for `j`. Even if it did not, the jump
   mux would override the branch mux.

## Timing

There is a single clock. One instruction takes exactly one cycle, so the
CPI is 1. The register file, the data memory and the PC all capture at the
rising edge, and the memories read combinationally, so the clock period
must cover the slowest instruction. That is `lw`: PC clock-to-output,
instruction memory access, register file read, 32-bit add in the ALU, data
memory access, the MemtoReg mux, and setup time at the register file. The
controller's delay runs in parallel with the register read and is assumed
not to lengthen this path. Because a register is written only at the edge,
an instruction that reads and writes the same register sees the old value.

Reset (`rst_n`, active low, synchronous) sets the PC to 0 and every
register to 0. The data memory is not reset.

## Interface of the top, `single_cycle_cpu`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous active-low reset |
| `prog_we`, `prog_addr`, `prog_wdata` | in | 1, 32, 32 | write one instruction word (byte address) into the instruction memory at the clock edge |
| `pc` | out | 32 | address of the current instruction |
| `instr` | out | 32 | current instruction |
| `ctrl` | out | `ctrl_t` | its control signals |

Parameters: `IMEM_WORDS` = 1024 and `DMEM_WORDS` = 1024 (4 KiB each). Both
memories are word-addressed by address bits [log2(words)+1 : 2]. Higher
address bits are ignored, so addresses wrap.

To load a program, hold `rst_n` low, write the words through the `prog_*`
port, then release reset. Execution starts at address 0.

## Design choices not fixed by the CPU's description

These are this implementation's own choices:

- **ALUctr is 2 bits** (`00` ADD, `01` SUB, `10` OR), matching the logic
  equations above. A 3-bit ALUctr would carry an always-zero top bit here.
  ALU code `11` is unused and gives 0.
- **Register 0 reads as 0 and ignores writes**, as in MIPS.
- **Memory sizes** are 1024 words each. Only aligned word accesses exist:
  address bits [1:0] are ignored, with no alignment trap.
- **Overflow** in add/sub is not detected; results wrap.
- **The instruction-memory load port** is an addition. A real system would
  load memory some other way.
- **Unknown encodings** act as no-ops (see the controller section).
- **`ori` and `sw`** implement OR with the zero-extended immediate and store
  R[rt], as their datapath connections (ALUctr = OR, Data In = busB)
  dictate.
- **Not modelled:** input/output devices. Nothing in the instruction subset
  reaches them.

## Verification

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_alu` | random and corner operands for ADD/SUB/OR, and the Zero flag |
| `tb_extender` | zero- and sign-extension |
| `tb_regfile` | random traffic against a model; R0 stays 0; a write becomes visible only after the edge |
| `tb_dmem`, `tb_imem` | random write/read-back against a model; address wrap |
| `tb_ctrl_and_plane` | all 4096 opcode/funct combinations |
| `tb_ctrl_or_plane`, `tb_controller` | the control table above, don't-cares skipped; unknown encodings give all zeros |
| `tb_ifu` | 2000 cycles of random nPC_sel/Zero/Jump against a next-PC model |
| `tb_datapath` | about 1600 random instructions under testbench-made control, all registers compared after each |
| `tb_single_cycle_cpu` | a program at default sizes (see below) |
| `tb_cpu_random` | 8 random programs of 233 instructions at default sizes |

`tb_single_cycle_cpu` fills a 10-word array with a `sw` loop, sums it with
an `lw`/`add` loop closed by `beq` and `j`, and stores and reloads the sum.
It also tests a taken and an untaken `beq`, zero extension in `ori`, a load
with a negative offset and a write to R0. It then stops on a jump to itself.
Both CPU-level testbenches run an instruction-level model (`tb_iss_pkg`) in
lockstep with the CPU. Every cycle they compare the PC. After every edge
they compare all registers and any stored word, which also proves one
instruction per cycle. They count how often each instruction and each
`beq` outcome happened, and fail if any never did.

The register and memory comparisons read the register file and data memory
through hierarchical references (`dut.u_dp.u_regfile.regs`,
`dut.u_dp.u_dmem.mem`). Renaming those instances means updating the
testbenches.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/cpu_pkg.sv tb/tb_asm_pkg.sv tb/tb_iss_pkg.sv tb/tb_ctrl_table_pkg.sv \
    tb/tb_single_cycle_cpu.sv --top-module tb_single_cycle_cpu
./obj_dir/Vtb_single_cycle_cpu
```

The packages are named explicitly; `-y` lets Verilator find every module by
its file name. Each block's testbench builds the same way with
its own top module. The testbenches use only `$urandom` for stimulus, and
every simulation finishes in well under a second.

`tb/tb_asm_pkg.sv` has one small encoder function per instruction
(`a_add`, `a_lw`, `a_beq`, …), which makes it easy to write new test
programs.
