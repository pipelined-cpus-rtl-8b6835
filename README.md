# miniMIPS, 4-stage pipeline

A single-cycle MIPS-style processor has to fit an instruction fetch, a
register read, an ALU operation and a data memory access into one clock
period. This design cuts that datapath into four stages:

| Stage | Work done |
|-------|-----------|
| **IF**  | Fetch at PC. Select the next PC. |
| **RF**  | Decode the instruction. Read the registers. Pick operands through the bypass muxes. Extend the immediate. Compare the operands for `beq`/`bne`. Decide branches and jumps. |
| **ALU** | Do the ALU operation. |
| **WB**  | Access data memory at the ALU result. Choose what to write back. Write the register file. |

With four stages, each clock period only has to cover the slowest part of
the datapath: a memory, the register file or the ALU. A new instruction
still starts every clock. The cost is hazards. An instruction may need a
result that an older instruction is still computing. Also, by the time a
branch is decided, the next instruction has already been fetched. Most of
what follows is about how the pipeline handles those two problems.

All RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`. Every block has a
self-checking testbench in `tb/`.

## Pipeline registers

```
 IF        |IF/RF     RF                          |RF/ALU      ALU   |ALU/WB     WB
 PC -> imem| IR, PC+4 decode, regfile read,       | A, B       ALU   | Y          dmem(Y)
           | valid,   bypass muxes, SEXT,         | store data       | store data WDSEL mux
           | in-slot  ASEL/BSEL, WASEL, comparator| WA, ctrl         | WA, ctrl   regfile write
```

* **IF/RF** holds the instruction, its PC+4, a *valid* bit and an
  *in-delay-slot* bit. An annulled slot holds a NOP (`0x00000000`, which is
  `sll $0,$0,0`) and has valid = 0.
* **RF/ALU** holds operands A and B, which are already bypassed and already
  passed through the ASEL/BSEL muxes. It also holds the store data, the
  write address, the link value and the decoded controls (`mips_pkg::ctrl_t`).
* **ALU/WB** holds the ALU result Y, the store data, the write address, the
  link value and the controls.

The register file is read combinationally in RF and written on the clock
edge at the end of WB. Instructions are decoded once, in RF, and their
control bundle travels down the pipe. Decoding the instruction fields again
in each stage would give the same behaviour.

## Branches: one slot, two policies

`beq` and `bne` are decided in the RF stage. An equality comparator
(`eq_comparator`) sits right behind the bypass muxes. Because of this, only
one instruction follows a branch or jump into the pipe before the PC
changes: the instruction being fetched while the branch is in RF.
`j`, `jal`, `jr` and `jalr` are resolved in the same stage.

The parameter `ANNUL_DELAY_SLOT` decides what happens to that instruction:

| `ANNUL_DELAY_SLOT` | Instruction after a branch or jump | Link value of `jal`/`jalr` |
|---|---|---|
| `0` (default) | Always executes (MIPS delay slot) | PC+8 (skips the slot) |
| `1` | Replaced by a NOP if the branch is taken or the jump happens | PC+4 |

With `1`, programs behave as on an unpipelined machine. A taken branch then
costs one empty cycle. With `0`, the compiler or programmer has to fill the
slot usefully, or put a NOP there.

The branch target is PC+4 of the branch plus the sign-extended offset times
4. The jump address is `{PC+4[31:28], J[25:0], 00}`. For `jr` and `jalr`
the target is the register value with its low two bits dropped.

## Data hazards: two bypass paths and one stall

An instruction in RF reads its operands. The instructions one stage and two
stages ahead of it may not have written their results yet. `bypass_unit`
chooses each operand (Rs and Rt separately) from three sources:

1. **ALU path.** The result being computed by the instruction now in the ALU
   stage. It is used when that instruction writes the operand's register
   (not `$0`) and its value is known in the ALU stage. That covers every
   ALU instruction and `jal`/`jalr`, whose link value is forwarded. Loads
   are not covered.
2. **WB path.** The value being written by the instruction now in WB: the
   ALU result, the loaded word or the link value, after the WDSEL mux. It is
   used when that instruction writes the register (not `$0`) and the ALU
   path was not chosen. The younger instruction wins.
3. **Register file.** Used otherwise. A register written in this same
   cycle reads as its old value. That case is exactly what the WB path
   covers.

The bypassed operands feed three places: the comparator, the jump-register
target, and the A/B operand muxes. So a branch may test a value computed by
the instruction just before it.

A load's data only exists in WB, after the memory read. If the instruction
in RF reads the destination of a load that is now in the ALU stage,
`hazard_unit` raises **stall** for one cycle. The PC and the IF/RF register
hold. A bubble (all controls 0) enters the ALU stage. In the next cycle the
load is in WB, and its word reaches the waiting instruction through the WB
path. This is the only case in which the pipeline stalls.

### Clock period and the longest paths

Take a single-cycle implementation with these example unit delays:

| Unit | Delay |
|---|---|
| Instruction fetch | 6 ns |
| Decode | 2 ns |
| Register read | 2 ns |
| ALU | 5 ns |
| Branch-target add | 4 ns |
| Data access | 6 ns |
| Register setup | 1 ns |

The single-cycle machine needs about 20 ns per instruction. In this
pipeline each stage holds roughly one of the large units:

* IF: fetch, about 6 ns plus setup.
* RF: decode, register read and the compare or target add.
* ALU: the ALU, about 5 ns.
* WB: data access and register write, about 6 ns plus setup.

So the clock can be close to 7 to 8 ns, about 2.5 times faster.

Two paths in this RTL cross a stage boundary, and they set the real limit:

* **ALU path into a branch.** A branch or `jr` whose operand comes through
  the ALU path chains ALU → bypass mux → comparator → next-PC mux in one
  cycle.
* **Load data.** The WB path carries the loaded word from the data memory
  read into the RF-stage operand muxes.

A timing-driven implementation could stall a branch for one cycle when its
operand comes from the ALU stage. That would shorten the first path, at the
cost of CPI.

## Traps and interrupts

The next-PC mux has three fixed inputs:

| Address | Use |
|---|---|
| `0x80000000` | Reset |
| `0x80000040` | Illegal instruction |
| `0x80000080` | Interrupt |

* **Illegal instruction.** Any instruction outside the supported subset
  traps. Register `$27` receives the trapping instruction's PC+4, so a
  handler can emulate the instruction and return with `jr $27`.
* **Interrupt.** An interrupt replaces the instruction in RF, which then
  does not execute. `$27` receives that instruction's PC+4, and the handler
  resumes at `$27 - 4`. An interrupt is accepted only on a real instruction
  that is not in a delay slot, and only while its PC has bit 31 clear.
  Code at `0x8000_0000` and above counts as supervisor code and is never
  interrupted.
* **Slot behaviour.** In both cases the instruction being fetched is
  annulled, whatever `ANNUL_DELAY_SLOT` is.

## Instruction subset

| Kind | Instructions |
|---|---|
| R-type ALU | `add addu sub subu and or xor nor slt sltu` |
| Shifts | `sll srl sra sllv srlv srav` |
| Immediate ALU | `addi addiu slti sltiu andi ori xori lui` |
| Memory | `lw sw` |
| Branches and jumps | `beq bne j jal jr jalr` |

Encodings are the standard MIPS ones. The ALU shifts operand B by A[4:0]:
for `sll` and its relatives, ASEL feeds `shamt` into A, and for `lui` it
feeds the constant 16. `andi`, `ori`, `xori` and `lui` zero-extend their
immediate; everything else sign-extends. `add`, `sub` and `addi` do not trap
on overflow, and memory accesses are whole words only.

Control encodings, as defined in `mips_pkg`:

| Signal | Encoding |
|---|---|
| PCSEL | 0 PC+4, 1 branch target, 2 register target, 3 jump address, 4 `0x80000080`, 5 `0x80000040`, 6 `0x80000000` |
| WASEL | 0 Rd, 1 Rt, 2 `$31`, 3 `$27` |
| WDSEL | 0 link, 1 ALU, 2 memory |
| ASEL | 0 register, 1 shamt, 2 16 |
| BSEL | 0 register, 1 immediate |

## Modules

| File | Contents |
|---|---|
| `mips_pkg.sv` | Opcodes, function codes, select enums, vectors, the `ctrl_t` control bundle |
| `minimips4.sv` | **Top.** The four stages, the pipeline registers and all muxes |
| `pc_unit.sv` | PC register, PC+4, branch-target adder, jump address, 7-input next-PC mux, hold |
| `imem.sv` | Instruction memory: combinational read, plus a write port for loading programs |
| `regfile.sv` | 32×32 register file: 2 combinational read ports, 1 clocked write port, `$0` reads as 0 |
| `control_logic.sv` | Instruction decoder, branch decision from BZ, trap and interrupt substitution |
| `eq_comparator.sv` | Equality comparator (BZ) |
| `sext.sv` | Sign or zero extension of the 16-bit immediate |
| `bypass_unit.sv` | Operand source selection (register file, ALU path, WB path) |
| `hazard_unit.sv` | Load-use stall, annulment of the fetched instruction, interrupt acceptance |
| `alu.sv` | ALU with N, V, C, Z flags (the flags are unused here, since branches use BZ) |
| `dmem.sv` | Data memory: combinational read, clocked write |

### Top-level interface (`minimips4`)

| Parameter | Default | Meaning |
|---|---|---|
| `ANNUL_DELAY_SLOT` | 0 | Branch-slot policy (see above) |
| `IMEM_WORDS` | 1024 | Instruction memory words |
| `DMEM_WORDS` | 1024 | Data memory words |

Memories ignore the address bits above their size. With the defaults,
`0x80000000` and `0x00000000` both reach instruction word 0.

| Port | Meaning |
|---|---|
| `clk`, `rst` | Clock. Synchronous, active-high reset. Reset loads PC = `0x80000000` and empties the pipe. Registers and memories are not cleared. |
| `irq` | Level-sensitive interrupt request |
| `imem_we`, `imem_waddr`, `imem_wdata` | Write one instruction word per clock. Normally used while `rst` is high. |
| `pc` | Current fetch address |
| `wb_we`, `wb_wa`, `wb_wd` | The register write made in WB this cycle |
| `mem_we`, `mem_addr`, `mem_wdata` | The data memory write made in WB this cycle |
| `stall`, `annul`, `irq_ack`, `byp_a`, `byp_b` | Hazard activity this cycle. Meant for observation and test. |

Timing:

* An instruction fetched in cycle *n* writes back in cycle *n*+3.
* Without hazards, one instruction completes per clock.
* A load followed at once by a user of its result costs one cycle.
* Each annulled slot costs one cycle.

## Simulating

The testbenches need no files and no arguments. Run them from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_minimips4 -y rtl -y tb +libext+.sv \
          rtl/mips_pkg.sv tb/mips_iss_pkg.sv tb/tb_minimips4.sv
./obj_dir/Vtb_minimips4
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_minimips4` | End-to-end test at the default parameters. Four random programs (ALU ops, loads with immediate uses, stores, forward branches, `j`/`jal`/`jr`/`jalr`, illegal opcodes, random interrupts) are compared write by write against the instruction-level model in `tb/mips_iss_pkg.sv`. Final registers and memory are compared too. It checks the 4-cycle latency and one-per-clock throughput, and fails if stalls, annulment, either bypass path, taken branches, traps or interrupts never occurred. |
| `tb_minimips4_annul` | The same test with `ANNUL_DELAY_SLOT = 1` |
| `tb_hazard_sequences` | Short classic sequences on both branch policies. Independent ALU ops; a dependent pair through the ALU path; a pair through the WB path; a shift loop with the slot filled by `andi` (4 clocks per pass); the same loop rewritten with the shift in the slot (3 clocks per pass); a load-use pair (exactly one stall). |
| `tb_<block>` | Unit tests of each module against independently computed values |

The instruction-level model in `mips_iss_pkg` is the easiest place to see
the intended architectural behaviour: delay slot or annulment, link values,
trap and interrupt entry.

## Where this design makes its own choices

The stage structure, the datapath multiplexers and their input numbering,
the early comparator, the NOP annulment mux and the selection rules of the
two bypass paths follow the classic 4-stage miniMIPS organisation. The
following are decisions of this implementation:

* **Operand forwarding.** The comparator and `jr` see bypassed operands. A
  `jal` link value is forwarded from the ALU stage.
* **Load stall.** One stall cycle for a load-use pair.
* **Link values.** PC+8 in delay-slot mode, PC+4 in annul mode. Traps and
  interrupts use `$27`, and each vector's role is this design's choice.
* **Interrupt acceptance.** Interrupts are accepted only in user mode
  (PC bit 31 = 0), and never in a delay slot.
* **Jump address.** It uses PC bits 31:28, so that the result is a full
  32-bit address.
* **Memories.** 1024-word memories with combinational reads and word-only
  access. The instruction memory has a load port.
* **Instruction subset.** The subset above, with no overflow traps.
* **Reset.** Synchronous. It does not clear the register file or the
  memories.

## Not included

* A 5-stage version with a separate memory stage.
* The simpler 2-stage pipelines (fetch/execute, and its variant with 2-cycle
  loads and stores).
* Branch variants that annul the slot only when the branch goes the
  unexpected way (`bne.t`-style).

Those are alternatives to this pipeline rather than parts of it.
