# RHIPS-Extended: a 16-bit multicycle processor with a kernel mode

RHIPS-Extended is a small 16-bit processor for teaching. Its main idea is to
add an operating-system layer to a minimal RISC design, using very little extra
hardware:

- **Two register files.** User code works in one register file. The kernel has
  a second, physically separate file, so entering the kernel saves nothing and
  cannot corrupt the user's registers.
- **Two memory pages.** Main memory is split into a user page and a kernel
  page. A single mode flag picks which page loads and stores reach.
- **One entry point.** Syscalls, the start request and bad instruction
  addresses all enter the kernel at address `0x4`. The cause is left in a
  kernel register.
- **A way back.** The kernel returns to user code with `retkern`. It halts the
  machine with `term`.

Every instruction is one 16-bit word. It runs in 3 to 9 clock cycles on a
shared datapath: one ALU, one set of operand registers and a result register,
all sequenced by a finite-state machine.

This repository holds synthesizable SystemVerilog for the processor. It also
holds a self-checking testbench for every block, and an end-to-end test that
boots a small kernel and runs programs on the full-size design.

## Instruction set

All registers, buses and memory words are 16 bits. A word address selects one
16-bit word. The opcode is always `IR[15:12]`.

| Format | Bits | Used by |
|---|---|---|
| A-type | `op` · `rd[11:8]` · `rs[7:4]` · `rt[3:0]` | slt, add, and, or, sub: `rd = rs op rt` |
| I-type | `op` · `rd[11:8]` · `imm[7:0]` | ls, ori, addi, l2r, l2m |
| J-type | `op` · `target[11:0]` | j, jal |
| Ext-type | `op` · `KD[11]` · `ext[10:8]` · `GP1[7:4]` · `GP2[3:0]` | beq, bne, ccp, cmp, term, syscall |

Opcodes, instruction by instruction:

| Opcode | Instruction | Effect |
|---|---|---|
| 0 | `slt rd, rs, rt` | `rd = (rs < rt)`, signed |
| 1 | Ext-type | see the extension codes below |
| 2 | `retkern` | `PC = $PC_Temp`; switch to user mode |
| 3 | `add rd, rs, rt` | `rd = rs + rt` |
| 4 | `and rd, rs, rt` | `rd = rs & rt` |
| 5 | `or rd, rs, rt` | `rd = rs \| rt` |
| 6 | `sub rd, rs, rt` | `rd = rs - rt` |
| 7 | `ls rd, imm` | `rd = rd << imm` |
| 8 | `ori rd, imm` | `rd = rd \| zero-extended imm` |
| 9 | `l2r rd, addr` | `rd = Mem[page:addr]` |
| A | `addi rd, imm` | `rd = rd + sign-extended imm` |
| B | `l2m rd, addr` | `Mem[page:addr] = rd` |
| C | `jal target` | `$ra (r2) = PC+1`; then jump |
| D | `j target` | `PC = {PC[15:12], target}` |
| E | `jr rd` | `PC = rd` |
| F | (none) | no-op |

Extension codes (`IR[10:8]`) of opcode 1:

| ext | Instruction | Effect |
|---|---|---|
| 0 | `beq GP1, GP2` | if `GP1 == GP2`: `PC = $br` |
| 1 | `bne GP1, GP2` | if `GP1 != GP2`: `PC = $br` |
| 2 | `ccp KD, GP2` | kernel register `KD` (0 or 1) = user register `GP2` |
| 3 | `cmp KD, GP1` | user register `GP1` = kernel register `KD` |
| 4, 5 | (km2mm, mm2km) | withdrawn from the instruction set; no-ops |
| 6 | `term` | halt: enter kernel mode, `PC = 0`, `$HOLD = 1` |
| 7 | `syscall GP1` | enter the kernel at `0x4`, with cause = value of `GP1` |

There are no branch offsets. A branch jumps to the address held in the branch
register:

- `$br` (r14) in user mode.
- `$Kbr` (k14) in kernel mode.

A program therefore loads the target first, for example
`and r14, r0, r0; ori r14, label; beq r3, r4`. An immediate is only 8 bits
wide, so a full 16-bit constant takes three instructions:
`ori rd, hi; ls rd, 8; ori rd, lo`.

## Registers and the two modes

Kernel mode is bit 0 of user register 13 (`$memPage`). The flag affects the
whole datapath:

- **Registers.** In kernel mode, all three read ports, the write port and the
  branch register come from the kernel file.
- **Memory.** Loads and stores use the address `{mode, IR[7:0]}`. User code
  reaches main memory words 0–255. The kernel reaches words 256–511.

| Main file | Meaning | Kernel file | Meaning |
|---|---|---|---|
| r0 | always 0 | k0, k1 | scratch; `ccp`/`cmp` reach them |
| r2 | `$ra`, written by `jal` | k2 `$PC_Temp` | PC of the syscall or interrupt |
| r10 `$IN` | reads the `in_port` pins | k3 `$ErrMask` | cause mask; resets to 0xFFFF |
| r11 `$OUT` | drives `out_port` | k4 `$ErrReg` | cause of the last kernel entry |
| r13 `$memPage` | bit 0 = kernel mode | k6 `$FlaggedInst` | instruction in IR at entry |
| r14 `$br` | branch target | k7 `$HOLD` | 1 = halted |
| | | k8 `$ReturnCode` | free for the kernel |
| | | k9 `$00` | always 0 |
| | | k14 `$Kbr` | kernel branch target |

All other registers are general purpose. User code cannot see the kernel
file at all. The only crossings are:

- `ccp`, which copies a user register into k0 or k1;
- `cmp`, which copies k0 or k1 into a user register.

The control unit flips the mode flag itself while `ccp` and `cmp` run.

## Memory map

The memory manager routes each instruction fetch by its PC:

| PC | Fetched from |
|---|---|
| 0x000–0x0FF | instruction memory. Kernel code sits at the bottom: the idle/halt code at 0, the handler at 0x4. User code follows. |
| 0x100–0x1FF | main memory, kernel page. The kernel can write code there with `l2m` and jump to it. |
| 0x200 and above | invalid. The fetch does not happen, and the kernel is entered with cause 2. |

The instruction memory is loaded from outside through the top's `prog_*` port.
Main memory has one port. All reads are combinational, and all writes take
effect at the rising clock edge.

## The control FSM

The first two states are the same for every instruction:

1. **Fetch** loads IR from the memory manager's output.
2. **Decode** captures the three register read ports in A (from `IR[7:4]`),
   B (from `IR[3:0]`) and C (from `IR[11:8]`).

Most instructions end in **PCInc**. It loads `PC + 1` from a dedicated adder,
or it stops the processor if `$HOLD` is set.

| Instruction | States after decode | Cycles |
|---|---|---|
| slt, add, and, or, sub, ls, ori, addi | Exec → WriteBack → PCInc | 5 |
| l2r | L2R → WriteBack → PCInc | 5 |
| l2m | L2M → PCInc | 4 |
| beq, bne | BrCmp → Branch or PCInc | 4 |
| j, jr | J or Jr → DoJump | 4 |
| jal | Jal → StoreJump → CalcJump → DoJump | 6 |
| ccp | Ccp → SetKernel → ResToKernel → SetUser → PCInc | 7 |
| cmp | Cmp → Cmp2 → Cmp3 → Cmp4 → Cmp5 → PCInc | 8 |
| syscall | Syscall → Sys2 … Sys7 | 9 |
| retkern | RetKern | 3 |
| term | Term → PCToZero → HoldSet → Stall | halts |

### Kernel entry

All kernel entries share states Sys2 to Sys7. They differ only in the state
that computes the cause:

- **Syscall:** the cause is the value of register GP1.
- **Start:** the cause is 1.
- **BadAddr:** the cause is 2.

From there the steps are:

1. Sys2 sets kernel mode.
2. Sys3 writes the cause to `$ErrReg`.
3. Sys4 writes IR to `$FlaggedInst`.
4. Sys6 writes the PC to `$PC_Temp`.
5. Sys7 jumps to `0x4`.

`$PC_Temp` holds the address of the `syscall` itself. A kernel that wants to
resume after it must add 1 before `retkern`.

### Halt and start

`term` switches to kernel mode, sets PC to 0, writes `$HOLD = 1` and waits in
Stall. A pulse on `start` then does two things:

- it clears `$HOLD`;
- it enters the kernel with cause 1.

Reset leaves the processor in user mode with PC = 0. By convention address 0
holds `term`, so after reset the processor halts and waits for `start`.

A typical kernel handler at `0x4` ANDs `$ErrMask` with `$ErrReg` and
dispatches on the cause:

- Cause 1: set `$PC_Temp` to the start of the user program and `retkern`.
- Cause 2: record an error and `term`.
- Any other cause: service the syscall.

The end-to-end testbench contains such a kernel, written with its small
assembler in `tb/rhips_asm_pkg.sv`.

## Datapath

`rhips_top` wires these parts together:

- **PC logic:** the PC register, the PC+1 adder and a 6-input PC multiplexer.
  Its inputs, in order: Result, PC+1, 0, branch register, 0x4, `$PC_Temp`.
- **`rhips_mem_subsys`:** the memory section, containing:
  - `rhips_imem`, `rhips_mainmem` and `rhips_memman`;
  - the choice between a data address and a fetch address.
- **`rhips_regbank`:** the register section. It contains:
  - `rhips_regfile` and `rhips_kregfile`;
  - the write-address multiplexer. Its inputs are `IR[11:8]`, `IR[7:4]`,
    `IR[11]` and the fixed numbers 2, 4, 6 and 7.
  - the write-data multiplexer. Its inputs are Result, PC+1, PC, IR, 0 and 1.
  - the mode switching.
- **`rhips_exec_unit`:** the execution section. It contains:
  - the A, B and C registers;
  - the A-input multiplexer: A, memory data, extended immediate, PC,
    `{PC[15:12],0}` or the cause;
  - the B-input multiplexer: B, C, 1 or `IR[11:0]`;
  - `rhips_extender`, `rhips_alu_control` and `rhips_alu`;
  - the Result register.
- **`rhips_control`:** the FSM. In every state it drives one `ctrl_t` control
  word, defined in `rhips_pkg`.

The operand convention matters most when reading the datapath: **the
immediate always enters on the ALU's A side and register C on the B side.**

- `ori rd, imm` computes `imm | C`.
- `ls rd, imm` computes `C << imm`. The ALU's shift moves B left by A.
- `l2r` passes the memory word through the A input.
- `l2m` passes C through the B input and writes the ALU output to memory.

The ALU operation codes are:

| Code | Operation |
|---|---|
| 0 | B << A |
| 1 | and |
| 2 | or |
| 3 | add |
| 4 | A − B |
| 7 | pass A |
| 8 | pass B |
| 9 | no-op |
| A | signed A < B |

The ALU also outputs a zero flag, which the branches use, and a signed
overflow flag, which is only brought out to the top.

## Interface of `rhips_top`

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `IMEM_WORDS` | 256 | instruction memory size, in words |
| `MAIN_WORDS` | 512 | main memory size: two pages of 256 words |

Ports:

| Port | Direction | Meaning |
|---|---|---|
| `clk` | in | clock |
| `rst` | in | synchronous reset, active high |
| `start` | in | leaves the halted state |
| `in_port[15:0]` | in | read by user code as `$IN` |
| `out_port[15:0]` | out | value of `$OUT` |
| `prog_we`, `prog_addr`, `prog_data` | in | write the instruction memory. Do this while the processor is halted or in reset. |
| `pc`, `ir`, `state` | out | current PC, instruction and FSM state |
| `kmode` | out | kernel-mode flag |
| `hold` | out | processor halted |
| `overflow` | out | ALU overflow in the current cycle |

## Where this RTL departs from or interprets the original design

The original description of the processor is inconsistent in a few places.
This RTL makes the following choices.

- **`jal`:** the original saves the return address in the register named by
  `IR[11:8]`, but those bits belong to the jump target. Here `jal` writes
  PC+1 to `$ra` (r2), so `jr r2` returns.
- **`beq`/`bne`:** the original state diagram labels the branch transitions
  in a way that would invert `beq`. Here `beq` branches on equal and `bne` on
  not-equal, as the instruction descriptions say.
- **`syscall` cause:** the original diagram shows an ALU no-op where the cause
  is formed. Here the ALU passes the value of GP1, so the cause is that value.
- **`cmp`, `term` and `ccp`:** the original state diagram and its
  step-by-step tables disagree on these. Here `cmp` ends with a register
  write, not a memory write. `term` sets `$HOLD` to 1, and the FSM waits
  instead of gating the clock. `ccp` switches back to user mode after its
  kernel write.
- **`retkern`:** described but left out of the original RTL. Implemented here.
- **`start` and the invalid-fetch trap:** only hinted at originally. The kernel
  expects cause 1 for start and cause 2 for an invalid address; this RTL
  provides the hardware for both. No other hardware interrupts exist.
- **Memory manager:** the original address rules assume addresses wider than
  16 bits. They are replaced by the 256/512 split shown above.
- **Not built:**
  - the planned instruction region above main-memory word 512;
  - the `$ReturnCode` address offset;
  - `km2mm`/`mm2km`, which are withdrawn.
- **Reset values** were not specified. All registers reset to 0, except
  `$ErrMask`, which resets to 0xFFFF so that every cause is seen.
- **Multiplexer input numbering** and **the merged execute state** are this
  RTL's own. In the original, every arithmetic instruction has its own state;
  here they share one Exec state, and the ALU control takes the operation from
  the opcode.

Cycle counts per instruction follow the state table above. The end-to-end
test's own relprime program computes relprime(5040) = 11 in 91,767
instructions and 428,278 cycles. This is not the original program, so
comparisons with published counts are not meaningful.

## Verification

Each block in `rtl/` has a self-checking testbench `tb/<module>_tb.sv`. Each
testbench:

- compares the block against an independent model or hand-worked values;
- prints `TB_RESULT checks=N failures=M`;
- stops itself with a watchdog if it hangs.

`rhips_top_tb` runs the full-size processor (default parameters):

1. It loads a kernel and a user program and checks that reset ends in the
   halted state.
2. It starts the processor with `$IN = 0`. The user program then runs an
   exercise of every instruction, including a count-down loop. The test
   checks the sequence of values on `$OUT`, a syscall round trip, the jump to an invalid address and the
   kernel's response to it.
3. It runs relprime for 5040 and for several random inputs, and checks the
   results against a reference model.

The test counts each mechanism and fails if any never occurred. The
mechanisms are:

- branches taken and not taken;
- `jal`, `jr`, `l2r`, `l2m` and `ls`;
- `ccp` and `cmp`;
- syscall, start, bad address and `retkern`;
- fetches from the kernel page;
- cycles spent in kernel mode;
- overflow;
- halt.

It takes a few seconds.

## Simulating

Use Verilator 5. Run from the repository root:

```
verilator --binary --timing -y rtl -y tb rtl/rhips_pkg.sv tb/rhips_asm_pkg.sv \
    tb/rhips_top_tb.sv --top-module rhips_top_tb -Mdir obj_top -o sim
./obj_top/sim
```

Any other testbench builds the same way: replace `rhips_top_tb` with its
name. Only the top-level test needs `tb/rhips_asm_pkg.sv`.

To run your own program, change `program_t` in `tb/rhips_asm_pkg.sv`. It
offers one method per instruction, plus `label`/`org` with two-pass label
resolution. Load the result through `prog_*`, pulse `rst` and then `start`.
