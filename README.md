# A cycle-accurate five-stage ARM pipeline in SystemVerilog

This is a synthesizable model of a 32-bit ARM integer core (architecture v5,
ARM state) built as a classic five-stage pipeline: IF, ID, EXE, MEM and WB.
It does not stop at instruction-level behaviour. It gives every instruction
the cycle count that follows from the pipeline. Register dependences are
resolved by four forwarding paths and one load-use interlock. Each instruction
that does not fit a one-cycle-per-stage pipeline has its own "lock": LDM, STM,
SWP, the multiplies and the long multiply-accumulates. A lock holds some stages
while the instruction occupies its stage for several cycles.

The core runs unmodified compiler output that avoids coprocessor instructions.
The included end-to-end test runs a recursive Fibonacci routine that uses the
standard APCS frame layout: `STMDB sp!, {fp, ip, lr, pc}` on entry and
`LDMDB fp, {..., fp, sp, pc}` on return. It computes fib(15) = 610 in 46,030
cycles (CPI 1.99).

## The pipeline

```
        IF_ID          ID_EXE              EXE_MEM               MEM_WB
  IF ---------> ID ------------> EXE --------------> MEM ---------------> WB
  PC, fetch     decode,          condition,          data access,         write w1
                read A, Bb, C    shifter, ALU,       loads into PC,       (ALUOutput/LMD)
                (banked, mode    address gen.,       SWP second cycle     and w2 (D)
                 of ID)          multiplier, PSRs,
                                 branches, SWI/BKPT
```

* **IF** fetches the word at the PC from the instruction memory. The next PC
  is PC+4, or the target of a branch taken in EXE or MEM. R15 read by an
  instruction is its own address + 8.
* **ID** decodes the instruction into a class (data processing, load/store,
  LDM, STM, multiply, and so on). It reads up to three registers through
  ports **A** (Rn, or the MLA accumulator), **Bb** (Rm) and **C** (Rs, store
  data, or the current STM register). Registers are read in the mode that
  applies to the instruction in ID.
* **EXE** tests the condition field. It runs the barrel shifter and the ALU,
  generates addresses, multiplies, and reads and writes the CPSR and SPSRs.
  Every branch is resolved here except loads into the PC.
* **MEM** performs the data access: byte, halfword or word, little-endian,
  with sign extension for LDRSB and LDRSH. It resolves loads into the PC.
* **WB** writes up to two registers per cycle. Port 1 writes **w1**:
  ALUOutput, LMD (the loaded data) or the link value. Port 2 writes **w2**:
  **D**, which is a changed base register or the RdLo of a long multiply.

The pipeline registers are packed structs in `arm_pkg` (`id_exe_t`,
`exe_mem_t`, `mem_wb_t`). ID_EXE carries the operand values, and for each one
a flag and the physical register it came from, so that EXE can replace a stale
value. It also carries a fourth operand **H**. Only UMLAL and SMLAL use H, to
carry RdHi.

### Physical register numbers

The register file holds the 31 physical registers of all modes. R0-R7 are
shared. R8-R14 have a user copy, plus an FIQ copy of R8-R14. R13 and R14 also
have a copy in each of IRQ, SVC, ABT and UND (`phys_reg()` in `arm_pkg` gives
the numbering). Decode turns every architectural register into a physical
number in the mode of the instruction. Destinations in the pipeline
registers are physical numbers as well. Forwarding and the interlock
therefore compare physical numbers, and a mode change never makes a
forwarded value land in the wrong bank.

## Forwarding and the load-use interlock

| path | from | to | carries |
|------|------|----|---------|
| 1 | WB (MEM_WB) | ID reads | any result being written this cycle (register-file write-before-read bypass) |
| 2 | MEM_WB | EXE operands A, Bb, C, H | ALUOutput/LMD, then D |
| 3 | EXE_MEM | EXE operands | ALUOutput or D of the instruction ahead (not load data, which does not exist yet) |
| 4 | MEM_WB (LMD) | store data at the start of MEM | a value just loaded, needed by the next store, STM or SWP |

Path 3 takes priority over path 2 because it holds the younger result.

A load cannot forward to the instruction right behind it at the start of EXE.
The loaded value does not exist until the end of MEM. `arm_hazard` stalls
IF and ID for one cycle and sends a bubble into EXE when the instruction in
EXE is a load and the instruction in ID reads its destination. Loads here
mean LDR, SWP and every LDM transfer. The stall is not needed when the
register is only used as store data (C of a store or STM) or as the SWP data
register (Bb of SWP). Path 4 supplies those in MEM. A load into the PC never
stalls, because it is a branch.

## Multi-cycle instructions: the locks

| instruction | lock | where it stays | stages held | cost over a one-cycle instruction |
|---|---|---|---|---|
| LDM of N registers | EXE_LDMLOCK | EXE, one transfer per cycle | IF, ID | N-1 |
| STM of N registers | ID_STMLOCK | ID, reads one register per cycle | IF | N-1 |
| SWP, SWPB | MEM_SWPLOCK | MEM: read, then write | IF, ID, EXE | 1 |
| MUL, MLA, UMULL, SMULL | EXE_MULLOCK | EXE, 8 bits of Rs per cycle | IF, ID | 0-3 |
| UMLAL, SMLAL | ID_LMULLOCK (+ EXE_MULLOCK) | ID for 2 cycles (4 source registers on 3 ports), the second overlapping the multiply | IF (then IF, ID) | as UMULL, +1 if the multiply takes 1 cycle |

* **LDM** computes the start address and the written-back base in its first
  EXE cycle. The base goes out as D and can be forwarded. Each following
  cycle sends the next transfer from EXE while IF and ID wait. Registers
  load from the lowest number to the highest. A transfer that loads R15
  branches from MEM. With the S bit, LDM either restores CPSR from SPSR
  (when R15 is in the list) or loads the user-mode registers.
* **STM** stays in ID and issues one micro-operation per register. Each
  micro-operation reads its register Ri through C. EXE keeps the running
  address, and only the first micro-operation writes the base back. With
  the S bit, the user-mode registers are stored.
* **SWP** reads memory in its first MEM cycle and writes Rm in its second.
  Nothing behind it moves during the second cycle. Path 4 does not apply
  from the read half of a SWP to its own write half.
* **Multiplies** run in `arm_multiplier`. It consumes Rs eight bits per
  cycle and stops as soon as the remaining bits of Rs are all zeros (all
  ones for signed operands). A multiply therefore takes 1 cycle for
  |Rs| < 2^8, 2 cycles below 2^16, 3 below 2^24 and 4 otherwise. The product
  is exact in 64 bits and the accumulate is added in. MUL/MLA use the low
  32 bits. The long forms write RdHi through w1 and RdLo through D.
* **UMLAL/SMLAL** need four source registers, but the register file has
  three read ports. The first ID cycle reads Rm and Rs and sends the
  operation to EXE, where the multiply starts at once (without the
  accumulator); IF waits. The second ID cycle reads RdLo (port A) and RdHi
  (port Bb) and writes them straight into the A and H fields of the
  operation already sitting in ID_EXE, together with their source register
  numbers, so forwarding still applies to them. ID then takes the next
  instruction, which waits behind the multiply like any other. EXE adds
  RdHi:RdLo to the 64-bit product in the cycle the product is complete, but
  not before the accumulator has arrived: a product finished in the first
  cycle is kept in a register for one cycle. So a long accumulate costs the
  same as UMULL/SMULL when the multiply takes two or more cycles, and one
  cycle more when it takes one. If the condition fails, the operation leaves
  EXE at once and the second ID cycle sends a bubble.

## Branches and exceptions

A branch resolved in **EXE** cancels the instructions in IF and ID. It costs
2 cycles, and there is no delay slot. These branches are B/BL/BLX,
BX/BLX(register), data processing with Rd = PC (with S, this also restores
CPSR from SPSR), SWI and BKPT.

A load into the PC resolves in **MEM**. That covers LDR PC and the R15
transfer of an LDM. It cancels IF, ID and EXE and costs 3 cycles. A cancelled
instruction in EXE never writes anything: no register, no flag, no memory.

SWI enters Supervisor mode at vector 0x08. BKPT enters Abort mode at vector
0x0C, the prefetch-abort vector. Both save the CPSR in the SPSR of the new mode
and the return address (the instruction after them) in its R14, and set the
I bit. `MOVS pc, lr` or `LDM ..., {..., pc}^` returns.

## Modes, CPSR/SPSR and the MSR mode forward

The CPSR is read in EXE, which is where conditions, MRS, SWI and BKPT need
it, and written in EXE (or in MEM for LDM with `^`). Only MSR can change the
mode without also branching. When an MSR in EXE writes a new mode, that mode
goes straight to ID in the same cycle. The instruction behind it then reads
its registers from the new bank with no bubble. All other mode changes come
with a branch, and the branch cancels whatever was read in the old mode.
In user mode an MSR can change only the flags. There are five SPSRs (FIQ,
IRQ, SVC, ABT, UND). Reading "the SPSR" in user or system mode returns the
CPSR.

## Memories and the system top

`arm_top` joins the core to two memories, `arm_imem` and `arm_dmem`. Both
are 64 KiB by default (`IMEM_ADDR_BITS`, `DMEM_ADDR_BITS`), and addresses
wrap modulo the size. Both answer in the same cycle, so fetch and data
access never wait. Each memory has a load port. A testbench or loader holds
`rst_n` low, writes the program (and any data) one word per clock, then
releases reset. The core starts at `RESET_PC` (0) in Supervisor mode with
IRQ and FIQ disabled. The debug ports read any physical register and any
data word without disturbing execution.

`perf` exports event counters. They count cycles and retired instructions,
including those whose condition failed, which are also counted separately.
They also count each use of forwarding paths 1-4, load-use stall cycles,
cycles spent in each lock, EXE and MEM branches, MSR mode forwards, and SWI
and BKPT entries.

## Measured timing

The core testbench measures these costs by comparing each program with one
that has the same number of instructions and no hazard:

| event | extra cycles |
|---|---|
| dependent ALU instructions (paths 1-3) | 0 |
| load followed by a user of the loaded register | 1 |
| same, one instruction in between | 0 |
| load followed by a store of the loaded register (path 4) | 0 |
| taken branch (EXE) / not-taken branch | 2 / 0 |
| load into the PC (MEM) | 3 |
| LDM or STM of 4 registers, over a single LDR/STR | 3 |
| SWP over LDR | 1 |
| MUL with Rs < 2^8 / = 2^16 / = 0x7F000000 | 0 / 2 / 3 |
| UMLAL over UMULL, Rs < 2^8 / Rs = 0x7F000000 | 1 / 0 |
| MSR changing the mode | 0 |

## Files

| file | contents |
|---|---|
| `rtl/arm_pkg.sv` | modes, PSR layout, physical register map, instruction classes, pipeline register structs, counters |
| `rtl/arm_top.sv` | core + instruction memory + data memory |
| `rtl/arm_core.sv` | the pipeline: stage logic, locks, branches, exceptions, counters |
| `rtl/arm_decoder.sv` | instruction class and read-port selection |
| `rtl/arm_regfile.sv` | 31 banked registers, 3 read / 2 write ports, path 1 |
| `rtl/arm_psr.sv` | CPSR and banked SPSRs |
| `rtl/arm_shifter.sv` | barrel shifter (addressing mode 1, scaled offsets) |
| `rtl/arm_alu.sv` | 16 data-processing operations, flags, leading-zero count |
| `rtl/arm_cond.sv` | condition test |
| `rtl/arm_multiplier.sv` | iterative 8-bit-per-cycle multiplier with early termination |
| `rtl/arm_addr.sv` | addressing modes 2-4: addresses, base write-back |
| `rtl/arm_forward.sv` | forwarding paths 2, 3, 4 |
| `rtl/arm_hazard.sv` | load-use interlock |
| `rtl/arm_imem.sv`, `rtl/arm_dmem.sv` | memories |
| `tb/arm_asm_pkg.sv` | instruction encoders used by the testbenches to build programs |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. With
Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/arm_pkg.sv tb/arm_asm_pkg.sv \
    $(ls rtl/*.sv | grep -v arm_pkg) tb/tb_arm_top.sv --top-module tb_arm_top -o sim
./obj_dir/sim
```

Substitute any other `tb_<module>` for `tb_arm_top`. All testbenches finish
in well under a second.

* `tb_arm_top` runs the full system at its default sizes. It runs two
  programs. The first exercises every mechanism: forwarding paths 1-4, the
  interlock, all five locks, EXE and MEM branches, conditional execution,
  the MSR mode forward, SWI, BKPT, CLZ and banked R13. It checks every
  register and memory result, and fails if any event counter stayed at zero.
  The second computes fib(15) with the recursive routine. It checks the
  result and the retired-instruction count, which the call tree fixes:
  1219 calls of 11, 14 or 25 instructions.
* `tb_arm_core` checks the timing table above against the core alone.
* `tb_arm_workloads` runs four small benchmark programs on the full system
  and checks their results. Each program's instruction, stall and
  taken-branch counts are derived from its control flow. The testbench then
  checks that cycles = instructions + 2 x taken branches + stalls + a fixed
  pipeline fill, with the same fill for all four:

  | program | instructions | cycles | CPI |
  |---|---|---|---|
  | sum of 1..100 in a loop | 306 | 508 | 1.66 |
  | sum of a 16-word array | 71 | 121 | 1.70 |
  | bubble sort of 16 signed words | 1043 | 1409 | 1.35 |
  | first ten Fibonacci numbers, no calls | 68 | 90 | 1.32 |
* The block testbenches compare each unit with a reference model. The
  shifter, ALU, address generator, forwarding unit, interlock and
  multiplier get thousands of random cases plus corner cases. The condition
  test is exhaustive. The decoder gets a table covering every class.

To build a program, load 32-bit words with the encoders in
`tb/arm_asm_pkg.sv` (`dpi`, `dpr`, `ldst`, `ldstm`, `br`, `mul`, `mull`,
`swp`, `msr_i`, `swi`, ...), or load words taken from a compiler's output.
Link code so that it starts at address 0, or change `RESET_PC`.

## What is not modelled, and choices to be aware of

* **Coprocessor instructions** (CDP, LDC, STC, MCR, MRC) execute as
  no-operations. So do LDRD/STRD, the enhanced DSP instructions and
  undefined encodings. None of them raise an exception.
* **Interrupts and aborts.** There are no IRQ, FIQ, data-abort or
  undefined-instruction entries. Only SWI and BKPT enter exceptions.
* **Thumb.** BX and BLX update the T bit, but the core always executes ARM
  code.
* **Memories** have no wait states or misses. Their sizes (64 KiB each) are
  a choice.
* **Multiplier timing.** Eight bits of Rs per cycle with early termination
  is one reasonable choice. The pipeline only requires that larger
  operands take more cycles.
* **Reset** clears all registers and starts in Supervisor mode at address 0.
* Unaligned word loads rotate the addressed word. Unaligned stores ignore the
  low address bits, as in ARMv5.
* The retired-instruction count covers the instructions the program itself
  executes. fib(15) retires 23,085 instructions in 46,030 cycles. Figures
  quoted elsewhere for this workload include start-up code that is not part
  of the routine, so their instruction counts are higher while their cycle
  counts are close (about 46,600).
