# DLX, single-cycle and five-stage pipelined

This is a 32-bit DLX processor in two forms. It follows the way Krste Asanović's
lecture "Simple Instruction Pipelining" (MIT) builds one:

* **`dlx_unpipelined`** is a Harvard-style machine with separate instruction
  and data memories. Every instruction finishes in one clock cycle (CPI = 1),
  and the control is pure combinational logic. The clock period has to cover
  the whole path: instruction fetch, register read, ALU, data memory and the
  register write set-up.
* **`dlx_pipelined`** is the same datapath cut into five stages: IF, ID, EX,
  MA and WB. A pipeline register sits between each pair of stages. The clock
  period only has to cover the slowest stage, yet one instruction still
  completes per cycle. The exception is when an instruction needs a result
  that an older instruction has not yet written. Then feedback from the later
  stages stalls it.

`dlx_top` puts the two machines side by side. They share no hardware. Each has
its own clock, reset, program-load port and observation outputs.

Everything is in `rtl/`. The self-checking testbenches are in `tb/`.

## Instruction set

All instructions are 32 bits. Registers are R0-R31. R0 always reads as zero.

| format | 31:26  | 25:21 | 20:16 | 15:11 | 10:6 | 5:0  | meaning |
|--------|--------|-------|-------|-------|------|------|---------|
| R      | 0      | rf1   | rf2   | rf3   | 0    | func | rf3 ← rf1 func rf2 |
| I      | opcode | rf1   | rf2   | immediate (16) ||| rf2 ← rf1 op imm; LW/SW address rf1 + disp |
| J      | opcode | offset (26) ||||| PC-relative jump |

The field layout is the lecture's. The numbers in the opcode and func fields
are the standard DLX ones, listed in `rtl/dlx_pkg.sv`:

* R-type: `ADD ADDU SUB SUBU AND OR XOR SLL SRL SRA SEQ SNE SLT SGT SLE SGE`.
* Immediates:
  * `ADDI SUBI SLLI SRLI SRAI SEQI SNEI SLTI SGTI SLEI SGEI` are sign-extended.
  * `ADDUI SUBUI ANDI ORI XORI` are zero-extended.
  * `LHI` places its immediate in the upper half.
* Memory: `LW`, `SW`.
* Control flow, on the single-cycle machine only:
  * `BEQZ` branches when rf1 is zero.
  * `J` and `JAL` are PC-relative.
  * `JR` and `JALR` jump to the address in rf1.
  * `JAL` and `JALR` write the return address to R31.

Branch and jump offsets are byte offsets, added to PC+4. The return address is
PC+4, because there is no delay slot. Memory accesses are whole 32-bit words.
There are no exceptions: overflow is ignored, and unsigned forms like `ADDU`
behave as their signed forms.

## The memory model

Both machines use `magic_ram` for instruction and data memory. Every access
completes in one cycle:

* A read is combinational.
* A write happens at the rising clock edge when `we` is high.

This idealisation stands for an on-chip cache that always hits. Each memory
holds `WORDS` = 2048 32-bit words (8 KiB). Addresses are byte addresses. Bits
[12:2] select the word, so the memory repeats every 8 KiB. The size is this
design's choice: it is the small end of the 8–64 KB cache sizes the lecture
quotes.

Neither machine ever writes its instruction memory. A program goes in through
the `imem_we / imem_addr / imem_wdata` port while `rst_n` holds the machine in
reset. The port writes one word per clock and shares the memory's address input
with the PC. The lecture does not cover program loading; this port is an
addition. An assertion in each core flags a write through it while the core
runs.

## Single-cycle machine and its hardwired control

The datapath (`dlx_unpipelined.sv`) is:

* PC → instruction memory → `inst`.
* Register file reads: `rs1 = inst[25:21]` and `rs2 = inst[20:16]`.
* The ALU takes `rd1` and either `rd2` or the extended immediate (BSrc).
* The data memory gets the ALU result as the address and `rd2` as the write data.
* The write-back value is the ALU result, the loaded word or PC+4 (WBSrc).
* The destination register is rf2, rf3 or R31 (RegDst).
* The next PC is PC+4 (`~j`), PC+4 + offset (PCR) or `rd1` (RInd).

`hardwired_ctrl` turns the opcode into every control point. For BEQZ it also
uses the ALU's zero flag. Its table:

| class | ExtSel | BSrc | OpSel | MemWr | RegWr | WBSrc | RegDst | PCSrc |
|-------|--------|------|-------|-------|-------|-------|--------|-------|
| ALU / ALUu | – | Reg | Func | no | yes | ALU | rf3 | ~j |
| ALUi  | sExt16 | Imm | Op | no | yes | ALU | rf2 | ~j |
| ALUiu | uExt16 | Imm | Op | no | yes | ALU | rf2 | ~j |
| LHI   | High16 | Imm | Op | no | yes | ALU | rf2 | ~j |
| LW    | sExt16 | Imm | +  | no | yes | Mem | rf2 | ~j |
| SW    | sExt16 | Imm | +  | yes | no | – | – | ~j |
| BEQZ  | sExt16 | – | 0? | no | no | – | – | PCR if zero, else ~j |
| J     | sExt26 | – | – | no | no | – | – | PCR |
| JAL   | sExt26 | – | – | no | yes | PC | R31 | PCR |
| JR    | – | – | – | no | no | – | – | RInd |
| JALR  | – | – | – | no | yes | PC | R31 | RInd |

Any other opcode does nothing and falls through to PC+4.

`alu_control` chooses the ALU operation from one of four sources:

* Func: the func field.
* Op: the opcode.
* `+`: a fixed add, for the load/store address.
* `0?`: the zero test. The ALU passes rf1 through, and its `z` output tells the
  control whether BEQZ is taken.

At the rising edge after an instruction, the PC, the register file and the data
memory all update together.

Two points in the lecture's material are read here in a particular way:

* **BEQZ.** The control table as given can be read as branching when the zero
  flag is 0. This design follows the instruction's name and branches when the
  register is zero.
* **Return address.** One drawing of the full datapath adds a second `+4` on
  the link path, giving PC+8. This design writes PC+4, as the jump-and-link
  drawing shows, because the machine has no delay slot.

## The five-stage pipeline

```
      IF              ID                     EX           MA                   WB
PC -> IMem -> IR -> GPR read, ImmExt ->  A,B,MD1 -> ALU -> Y,MD2 -> DMem -> R -> GPR write
                    BSrc mux         IR(EX)        IR(MA)          IR(WB)
```

The registers and their names are: PC; IR(ID); A, B, MD1 and IR(EX); Y, MD2
and IR(MA); R and IR(WB).

* MD1 and MD2 carry the store data down to the data memory.
* The WBSrc mux sits before R in the MA stage.
* `rf_we / rf_ws / rf_wd` show the register write made in WB.

**Control travels with the instruction.** Each stage keeps its own copy of the
instruction register and decodes its own control points from it. The decoder is
the same `hardwired_ctrl` in every stage:

* ID: ExtSel and BSrc, from IR(ID).
* EX: OpSel, from IR(EX).
* MA: MemWrite and WBSrc, from IR(MA).
* WB: RegDst and RegWrite, from IR(WB).

The point to notice is that the register written in WB is chosen from IR(WB).
Taking it from the instruction being decoded would write the result of an old
instruction into the register named by a new one. The lecture calls that first
attempt "not quite correct".

**Timing.** An instruction fetched in cycle *t* is in ID at *t+1*, EX at *t+2*,
MA at *t+3* and WB at *t+4*. Its register write takes effect at the end of
*t+4*. Without hazards, one instruction retires per cycle.

**Data hazards: stall feedback.** The register file is written at the clock
edge. An instruction in ID therefore sees a new value only after its producer
has left WB. `hazard_unit` compares the source registers of the ID instruction
with the destinations of the instructions in EX, MA and WB:

* The sources are rf1, plus rf2 for R-type and SW.
* A stage counts only if its instruction writes a register.
* R0 never causes a hazard.

On a match, `stall` goes high. PC and IR(ID) hold, and a bubble goes into EX.
The bubble is the all-zero word, `SLL R0,R0,R0`, which changes nothing.

There is no bypassing. An instruction that needs the result of the one just
before it waits 3 cycles:

```
cycle        0   1   2   3   4   5   6   7   8
ADDI r6      IF  ID  EX  MA  WB
ADD r7,r6,r6     IF  ID  ID  ID  ID  EX  MA  WB     (3 stall cycles)
```

Instruction and data memories are separate, so there is no structural hazard.
The lecture describes the mechanism only as "feedback to stall". The
register-number comparison is the simplest logic that does it, and is this
design's choice.

**No jumps.** The lecture's pipelined datapath has no jump or branch hardware,
and neither does this one.

* BEQZ, J and JR go through the pipeline as no-ops.
* The register writes of JAL and JALR are suppressed, since no PC travels down
  the pipeline.

Control hazards, and killing instructions on a taken branch, are therefore
outside this design. Use the single-cycle machine for programs with control
flow.

## Why pipeline: the clock-period argument

In the single-cycle machine, the clock period must cover the whole path:

t_C > t_IFetch + t_RFetch + t_ALU + t_DMem + t_RWB

With pipeline registers, it only has to cover the slowest stage. Suppose the
memories take 10 units, the ALU 5 and the register file 1. Then a four-stage
split, with write-back merged into the memory stage, brings 27 units down to
10: a 2.7× speedup. If all five steps take 5 units, four stages give 25 → 10
(2.5×), and five stages give 25 → 5 (5×).

This design uses the five-stage organisation. These are gate-delay arguments.
The RTL carries no delays. What simulation can show is the cycle behaviour:
CPI = 1 without hazards, and a fixed 4-cycle latency to write-back.

## Module list

| file | what it is |
|------|------------|
| `dlx_pkg.sv` | opcodes, func codes, control-point enums, the `ctrl_t` control bundle |
| `magic_ram.sv` | one-cycle memory, combinational read, write at the clock edge |
| `gpr_file.sv` | 32 × 32 register file with two reads and one write; R0 = 0 |
| `imm_ext.sv` | immediate extension: sExt16 / uExt16 / sExt26 / High16 |
| `alu.sv` | ALU with zero flag |
| `alu_control.sv` | ALU operation from func, opcode, `+` or `0?` |
| `hardwired_ctrl.sv` | the control table |
| `hazard_unit.sv` | stall feedback for the pipeline |
| `dlx_unpipelined.sv` | single-cycle machine |
| `dlx_pipelined.sv` | five-stage pipeline |
| `dlx_top.sv` | both machines side by side |

Parameters:

* `IMEM_WORDS` and `DMEM_WORDS` default to 2048.
* `RESET_PC` defaults to 0.

Reset is asynchronous and active low. It clears the registers and sets the PC.
Memory contents are not reset.

## Simulating

Every testbench checks itself. Each prints `TB_RESULT checks=N failures=M` and
has a watchdog. Testbenches that run programs compare the machine with an
instruction-level reference model in `tb/dlx_tb_pkg.sv`. The model executes
each instruction directly from its definition, with no knowledge of control
signals or stages.

A typical build with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dlx_pkg.sv tb/dlx_tb_pkg.sv rtl/*.sv tb/tb_dlx_top.sv \
    --top-module tb_dlx_top -Mdir obj_top
./obj_top/Vtb_dlx_top
```

Replace `tb_dlx_top` with any other testbench name.

| testbench | what it shows |
|-----------|---------------|
| `tb_dlx_top` | Both machines at full size. The pipeline runs 1500 random ALU/LW/SW instructions; its writes must match the model in order, and the last instruction must write back at cycle (n − 1 + stalls + 4). The single-cycle machine fills a table of squares in a nested loop, sums it, and calls subroutines through JAL/JR and JALR. It must match the model and take exactly one cycle per instruction. Every mechanism (stall, load, store, full-rate issue, branch taken and not taken, J, JAL, JR, JALR) must occur. |
| `tb_dlx_pipelined` | Five independent instructions write back in cycles 4 to 8. A back-to-back dependence costs exactly 3 stall cycles. In the cycles after issue, each stage holds the instruction it should, so no two instructions share a stage. A 400-instruction random program matches the model. |
| `tb_dlx_unpipelined` | Cycle-by-cycle PC, register-write and store comparison with the model on a loop, subroutine and random ALU program. |
| `tb_hardwired_ctrl` | Every row of the control table. |
| `tb_hazard_unit`, `tb_alu`, `tb_alu_control`, `tb_imm_ext`, `tb_gpr_file`, `tb_magic_ram` | Unit checks against independent reference computations. |

The testbenches load programs through the load port. They preset the data
memory by writing `u_dmem.mem` hierarchically.

## What to trust, and what was chosen here

These parts follow the lecture's drawings and tables:

* the datapaths;
* the control table;
* the per-stage instruction registers;
* the placement of the pipeline registers;
* the memory model.

These are this design's own choices:

* the opcode and func numbers (standard DLX);
* the 32-bit word and 8 KiB memories;
* R0 reading as zero;
* the reset behaviour;
* the LHI implementation;
* the program-load port;
* the bubble encoding;
* the hazard-detection logic.

Things the lecture presents but this RTL does not contain:

* the microcoded DLX it compares against;
* the four-stage variants used in the clock-period argument;
* jumps, branches and control-hazard handling in the pipeline;
* bypassing.
