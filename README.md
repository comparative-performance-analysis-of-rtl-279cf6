# Single-cycle and five-stage pipelined RV32I processors

This is RTL for two processors that run the same RV32I integer programs. They differ
only in how they organise execution:

* **Single-cycle.** Fetch, decode, execute, memory access and write-back all happen in one
  clock period. The design is simple, but the clock period has to cover the whole path
  from the PC through instruction memory, register file, ALU and data memory back to the
  register file.
* **Five-stage pipeline.** The same work is split into IF, ID, EX, MEM and WB, with a
  register between each pair of stages. Up to five instructions are in flight, and the
  clock period only has to cover the slowest stage. The price is hazards: an instruction
  can need a result that is not yet in the register file, or a branch can change the PC
  after later instructions have already been fetched. Forwarding paths, a stall and a
  squash deal with them.

The pair exists to measure that trade-off on an FPGA. The reference figures for a
Basys 3 (Artix-7) board are:

| | single-cycle | pipelined |
|---|---|---|
| critical path | 19.58 ns (51.07 MHz) | 6.31 ns (158.48 MHz) |
| execution time of n instructions | n · Ts | (k + n − 1) · Tp, k = 5 |
| speedup, n = 10 / n = 1000 | 1 | 2.2 / 3.09 |
| memories | 64 KB + 64 KB, LUT (distributed) RAM | 64 KB + 64 KB, block RAM |

Both cores are written to produce exactly these cycle counts when there are no hazards.
The testbenches check them. The FPGA timing, area and power figures are not
reproduced here.

## Instruction set and memory map

Both cores implement the RV32I base integer instructions: LUI, AUIPC, JAL, JALR, the six
conditional branches, LB/LH/LW/LBU/LHU, SB/SH/SW, and all register-immediate and
register-register ALU operations. FENCE, ECALL, EBREAK and unknown opcodes are treated
as no-operations. The cores have no CSRs, no interrupts and no traps.

Each processor has separate 64 KB instruction and data memories (`MEM_SIZE` = 16384
words). Execution starts at address 0. Addresses wrap modulo the memory size. A
program linked with its data at 0x0200_0000 therefore finds it at data word 0, and a
stack top of 0x0200_0400 lands at byte 0x400. The memories assume naturally aligned
accesses. A halfword access uses only address bit 1.

By convention a program leaves its result in **data word 0**. Both board-level tops show
that word: the single-cycle top as `final_result` (32 bits) and `leds` (low 16 bits), the
pipelined top as `leds`.

## Shared building blocks

| module | role |
|---|---|
| `rv32_pkg` | opcodes, ALU operation codes, select codes, control bundle `ctrl_t` |
| `control_unit` | opcode → `ctrl_t`: register write, memory read/write, branch/JAL/JALR, ALU class, operand-A source (rs1, PC, PC+4), operand-B source (rs2, immediate), immediate format, write-back source |
| `alu_control` | ALU class + funct3 + instruction bit 30 → ALU operation |
| `alu` | RV32I ALU, plus pass-A and pass-B, plus a Zero flag |
| `imm_gen` | I/S/B/U/J immediates, sign-extended |
| `regfile` | 32 × 32 bits, two asynchronous read ports, one write port, x0 fixed at 0, synchronous reset clears all registers |

Two choices keep the write-back mux down to two inputs, ALU result or memory data.
JAL and JALR pass PC+4 through the ALU as operand A ("pass A"). LUI passes its immediate
through as operand B ("pass B").

## The single-cycle processor (`rv32_single_core`, `rv32_single_top`)

In one cycle the core does the following:

1. The PC addresses `instr_mem`, which reads asynchronously.
2. `control_unit`, `imm_gen` and the register file work on the instruction.
3. The operand muxes feed the ALU.
4. For a **conditional branch** the ALU compares rs1 with rs2: SUB for BEQ/BNE, SLT for
   BLT/BGE, SLTU for BLTU/BGEU. The Zero flag then decides the branch. BEQ, BGE and BGEU
   branch when the result is zero; BNE, BLT and BLTU when it is not. Because the ALU is
   busy comparing, a separate adder forms the target PC + imm.
5. The ALU result addresses `data_mem`. That memory reads asynchronously and writes at
   the clock edge. The instruction's funct3 goes to `data_mem` directly, so byte and
   halfword access and sign extension happen inside the memory.
6. The ALU result or the loaded value is written to rd at the clock edge, together with
   the new PC.

`rv32_single_top` adds the two 64 KB memories. `final_result` and `leds` show data
word 0. `reset` is synchronous and active high.

## The pipelined processor (`rv32_pipe_core`, `rv32_pipe_top`)

### Stages and the block RAMs

```
        IF             ID                     EX                 MEM            WB
  PC ─► imem ══► decode, regfile,  ══► operand muxes,   ══► dmem addr,  ══► select ALU or
        (BRAM        branch unit,       forwarding,          store bytes      load data,
         output      next-PC logic      ALU control, ALU     (BRAM)           write rd
         register)
```

Both memories read synchronously, as FPGA block RAM does, and each output register does
double duty as half of a pipeline register:

* `imem` latches the word at the PC at the end of IF. Its output *is* the instruction
  half of IF/ID. Only the PC and a valid bit are kept in the IF/ID register itself. During
  a stall `imem_en` goes low, so the instruction holds.
* `dmem` latches the addressed word at the end of MEM. Its output arrives in WB, where
  `mem_align` selects and extends the byte, halfword or word. In MEM, `mem_align` also
  builds the four byte-write enables (`we[3:0]`) and copies store data into every lane.

ID/EX, EX/MEM and MEM/WB are packed structs in `rv32_pipe_core`. Each carries a `valid`
bit. A bubble is a cleared struct. `retire` is the MEM/WB valid bit, so it pulses once
for each instruction that completes.

### Forwarding (`forwarding_unit`)

There are three bypass paths:

| path | from | to | used when |
|---|---|---|---|
| "from ex" | EX/MEM ALU result | EX operands A/B | the previous instruction writes the register; never for a load |
| "from wb" | WB write data (ALU result or loaded value) | EX operands A/B | the instruction two ahead writes the register |
| decode bypass | WB write data | ID operands rs1/rs2 | the instruction in WB writes a register being read in ID, in the same cycle |

When both EX/MEM and MEM/WB write the register, the EX/MEM (younger) value wins.
Register x0 is never forwarded. The decode bypass plays the role of a write-through
register file. Without it, an instruction three behind a producer would read a stale
value.

### Hazards and their cost (`hazard_unit`)

Conditional branches, JAL and JALR are resolved in **ID**. The branch unit compares the
operands read in decode and the next-PC mux picks PC+4, the branch/JAL target
(`pc + imm`) or the JALR target (`(rs1 + imm) & ~1`). The only forwarding into ID is
from WB, which gives the following hazard rules:

| situation | action | cost |
|---|---|---|
| load in EX, dependent instruction in ID | stall 1 cycle; the value then arrives through "from wb" | 1 cycle |
| branch or JALR in ID reads a register written by the instruction in EX | stall until the producer reaches WB | 2 cycles |
| same, producer in MEM | stall | 1 cycle |
| taken branch, JAL or JALR | squash the one instruction fetched behind it (IF/ID valid bit cleared) | 1 cycle |

A stall holds the PC, holds IF/ID (through `imem_en`) and inserts a bubble into ID/EX.
The squash is gated off during a stall, because the redirect only counts once the
operands are valid. Stores need no stall: the store data is the forwarded rs2 value in
EX.

Without hazards, the n-th instruction retires in cycle n + 4 after reset. This is the
k + n − 1 cycle count with k = 5.

### Board top

`rv32_pipe_top` has the ports of a board design: `clk`, `rst_btn` (a push button,
synchronised by two flip-flops, active high) and `leds[15:0]`. The block-RAM data memory
has only one port. A result register therefore watches the store port and merges every
byte written to word 0. The LEDs show its low half. Reset clears it.

`rv32_compare_top` instantiates both tops side by side. They share nothing: the
single-cycle ports are `s_*` and the pipelined ports are `p_*`.

## Where this RTL goes beyond, or departs from, the reference design

The block structure follows the reference design: PC, instruction memory, control unit,
register file, immediate generator, ALU with Zero flag, ALU control, branch unit,
forwarding muxes ("from ex", "from wb", decode bypass), hazard detection, pipeline
registers and 64 KB memories. The following are this implementation's own decisions:

* Control-signal set and encodings, the ALU-class encoding, and pass-A/pass-B for link
  values and LUI.
* The single-cycle branch target comes from a separate adder rather than the ALU, which
  is busy comparing.
* Forwarding into ID only from WB, as the reference datapath draws it. The resulting
  two-cycle stall for a branch that depends on the instruction before it is a
  consequence of that.
* Memory behaviour:
  * reads are registered in the pipeline and asynchronous in the single-cycle design;
  * the block RAM is read-before-write;
  * addresses wrap modulo the memory size;
  * accesses are assumed aligned.
* Reset is synchronous and active high, with two-flop synchronisation of the pipelined
  board button. The LED result register is also this implementation's own.
* Instruction memories load a `$readmemh` image through `INIT_FILE`. The testbenches
  write programs into the memory arrays directly instead.
* Expected results for the pipelined factorial tests are 5! = 0x78 and 6! = 0x2D0. The
  reference report gives an LED reading of 0x72 for a factorial run; that value is
  neither of these, and it is not used.

## Verification

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog.

* `tb/rv_tb_pkg.sv` contains three things:
  * an RV32I assembler (one function per instruction);
  * the test programs:
    * sum of 1..n;
    * n! through a stack frame and a shift-and-add multiply subroutine;
    * a mixed program that hits every instruction class and hazard case;
    * straight runs of independent instructions;
  * a small **reference instruction-set simulator** that shares no code with the RTL.
* The unit testbenches (`tb_alu`, `tb_alu_control`, `tb_control_unit`, `tb_imm_gen`,
  `tb_regfile`, `tb_instr_mem`, `tb_data_mem`, `tb_imem`, `tb_dmem`, `tb_mem_align`,
  `tb_branch_unit`, `tb_forwarding_unit`, `tb_hazard_unit`) compare against models
  written in the testbench.
* `tb_rv32_single_core` and `tb_rv32_pipe_core` compare every stored word and all 32
  registers with the reference simulator. They also check the cycle counts:
  * single-cycle: n instructions take n cycles;
  * pipeline: 14 cycles for 10 independent instructions;
  * +1 cycle for a load-use pair;
  * +2+1 cycles for a taken branch on the previous result;
  * +1 cycle for a jump.

  The pipeline testbench also counts stalls, squashes and each bypass path, and requires
  every one of them to occur.
* `tb_rv32_single_top` and `tb_rv32_pipe_top` run the board tops at full size:
  * single-cycle: sum 1..10 → 0x37, 10! → 0x375F00;
  * pipelined: sum 1..11 → 0x42, 5! → 0x78, 6! → 0x2D0, read on the LEDs.
* `tb_rv32_compare_top` is the end-to-end test with every parameter at its default. It
  runs all programs on both processors, including a 1000-instruction straight run
  (1001 vs 1005 cycles). It evaluates the speedup formula with the reference clock
  periods: 2.22 for n = 10 and 3.09 for n = 1000.

* `tb_hex_boot` boots both processors from the `$readmemh` image `tb/prog_sum10.hex`
  through `INIT_FILE`, the way a compiled program is loaded.

To run one of them with Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/rv32_pkg.sv tb/rv_tb_pkg.sv tb/tb_rv32_compare_top.sv --top-module tb_rv32_compare_top
./obj_dir/Vtb_rv32_compare_top
```

Substitute any other `tb_*` name. `tb_instr_mem` reads `tb/prog_sum10.hex` by a path
relative to the repository root. All of them finish in well under a second.

## Using and changing the design

* **Loading a program:** build it into a `$readmemh` file with one 32-bit word per line,
  linked at address 0, and pass the file name as `INIT_FILE` of `rv32_single_top` or
  `rv32_pipe_top` (`S_INIT_FILE`/`P_INIT_FILE` on `rv32_compare_top`). Keep data in the
  low 64 KB or rely on the address wrap.
* **Memory size:** `MEM_SIZE` is in 32-bit words and must be a power of two.
* **Reset address:** `RESET_PC` on either core.
* **Adding forwarding into ID** (from EX/MEM) would remove one stall cycle for
  dependent branches. It touches `forwarding_unit` and the `id_needs_early` rule in
  `hazard_unit`.
