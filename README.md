# A 5-stage pipelined RV32I processor

This is a classic in-order RISC-V pipeline: fetch (IF), decode (ID),
execute (EX), memory (MEM) and writeback (WB). Each instruction takes five
cycles from fetch to register write. A new instruction can enter every cycle,
so the ideal throughput is one instruction per clock (CPI = 1).

Overlapping instructions this way creates two kinds of hazard. The design
resolves each with a small, fixed set of mechanisms:

| problem | mechanism | cost |
|---|---|---|
| an instruction reads a register that an older instruction, still in flight, will write | forwarding (bypass) into Decode from EX, MEM or WB | none |
| the older instruction is a load, still in EX when the reader is in ID | load/use stall: hold IF and ID, insert a bubble into EX | 1 cycle |
| a branch is taken, or a jump executes (fetch always predicts *not taken*) | squash the two younger instructions in ID and EX | 2 cycles |

The performance model that follows is `C = I + B`: total cycles equal the
instructions completed plus the bubbles injected, so `CPI = 1 + B/I`. As an
example, take 25 % loads of which 20 % are followed at once by a user, and
20 % branches of which 40 % are taken. That gives
`CPI = 1 + 0.25·0.20·1 + 0.20·0.40·2 = 1.21`.

The core also accepts 16-bit compressed instructions (RV32C). A compressed
decoder in Fetch expands each one to its 32-bit equivalent, and the PC then
advances by 2 instead of 4.

## Datapath, stage by stage

* **IF** (`fetch_pc`, `instr_mem`, `compressed_decoder`): the PC reads the
  instruction memory combinationally. The memory is built from 16-bit
  halfwords, so a 32-bit instruction may start at any even address. If the low
  two bits of the fetched word are not `11`, the compressed decoder expands the
  low halfword. The next sequential PC (PC+2 or PC+4) is stored with the
  instruction. It becomes the return address of `jal`/`jalr`.
* **ID** (`decoder`, `control`, `imm_gen`, `regfile`, `forwarding_unit`): the
  decoder turns the instruction into an internal 6-bit code (`op_e`) and
  extracts `rs1`, `rs2` and `rd`. Register fields the instruction does not use
  read as x0. Control maps the code to the control word `ctrl_t`, shown below.
  The immediate generator builds the I/S/B/U/J immediate. The register file is
  read, and then each operand passes through a 4-way forwarding mux.
* **EX** (`alu`, `branch_unit`): operand 1 is `rs1` or the PC, and operand 2 is
  `rs2` or the immediate. For branches, `jal` and `auipc` the ALU adds PC and
  immediate, so its result is the target. For `jalr` it adds `rs1` and the
  immediate and clears bit 0. The branch unit compares `rs1` with `rs2`. A taken
  branch or any jump redirects the PC to the ALU result.
* **MEM** (`data_mem`): a combinational read and a clocked write, with byte,
  halfword and word widths. Loads are sign- or zero-extended.
* **WB**: a 3-way mux chooses the ALU result, the loaded data or PC+4, and
  writes it to the register file.

The control word carries eleven fields: `reg_do_write`, `reg_wr_src_ctl`
(2 bits), `mem_do_write`, `mem_do_read`, `mem_op` (4 bits), `do_jmp`,
`alu_op1_ctl`, `alu_op2_ctl`, `do_br`, `alu_ctl` (5 bits) and `br_op` (3 bits).
The field widths are those of the reference datapath. The encodings inside
each field are this implementation's own; they are defined in `riscv_pkg`.

## Pipeline registers and the hazard unit

Every pipeline register (`pipe_reg`, instantiated as IF/ID, ID/EX, EX/MEM and
MEM/WB with a struct payload each) works in one of three modes, set every
cycle by `hazard_unit`:

| mode | on the clock edge |
|---|---|
| `PIPE_NORMAL` | loads the new value (the instruction advances) |
| `PIPE_STALL` | keeps its value (the instruction is held) |
| `PIPE_BUBBLE` | loads a no-operation (the instruction is cancelled) |

The hazard unit is combinational. It looks at the instruction in EX and the
register fields of the one in ID:

| condition | trigger | PC (IF) | IF/ID (ID) | ID/EX (EX) | EX/MEM | MEM/WB |
|---|---|---|---|---|---|---|
| load/use | EX is a load, `EX.rd != x0`, and `EX.rd` is `ID.rs1` or `ID.rs2` | stall | stall | bubble | normal | normal |
| mispredict | EX holds a taken branch, or a `jal`/`jalr` | load target | bubble | bubble | normal | normal |

The two conditions never occur together, because EX holds either a load or a
branch/jump. An assertion in the top checks this.

### Why forwarding goes into Decode, and why one stall is enough

Bypassing is done before the ID/EX register, not at the ALU inputs. For each
source register the forwarding unit picks the youngest in-flight writer:

1. **EX**: the value the instruction now in EX will write. This is the ALU
   result, or PC+4 for a jump. A load in EX has no value yet; that is exactly
   the load/use case, which is stalled instead.
2. **MEM**: the ALU result, the data just read from memory, or PC+4.
3. **WB**: the value being written this very cycle. The register file has no
   write-through; this path covers it.
4. Otherwise the register file.

After the one-cycle load/use stall the load has moved to MEM, and its data is
forwarded from there. With forwarding in Decode, the operands captured in ID/EX
are already final, and EX needs no further muxing.

A consequence: the EX-stage ALU result feeds the Decode operand mux within the
same cycle (EX → ID path). This is the longest combinational path of the
design.

### Timing you can rely on

* The first instruction after reset is in WB in the 5th cycle; after that, one
  instruction per cycle when there are no hazards.
* Each load/use adds exactly 1 cycle, and each taken branch or jump exactly 2.
  The end-to-end testbench checks the cycle count of every program exactly,
  against `3 + I + S + 2·(F − 1)` clock edges from reset release to the last
  retirement (S stalls, F redirects before the final self-jump).

## Files

| file | block |
|---|---|
| `rtl/riscv_pkg.sv` | shared types: `ctrl_t`, `op_e`, ALU/memory/branch codes, stage payload structs, `pipe_mode_e`, `fwd_sel_e` |
| `rtl/riscv_pipeline.sv` | top: all stages wired together |
| `rtl/pipe_reg.sv` | pipeline register with normal/stall/bubble |
| `rtl/fetch_pc.sv` | PC, +2/+4 adder, PC mux |
| `rtl/instr_mem.sv` | instruction memory (halfword organised, load port) |
| `rtl/compressed_decoder.sv` | RV32C → RV32I expansion |
| `rtl/decoder.sv`, `rtl/control.sv`, `rtl/imm_gen.sv` | decode, control word, immediates |
| `rtl/regfile.sv` | 32×32 register file, 2 read + 1 write + debug read |
| `rtl/alu.sv`, `rtl/branch_unit.sv` | execute |
| `rtl/data_mem.sv` | data memory |
| `rtl/forwarding_unit.sv`, `rtl/hazard_unit.sv` | pipeline control |

Every `tb/tb_<module>.sv` is a self-checking testbench for one block.
`tb/rv_asm_pkg.sv` holds an instruction assembler and a small reference model
of RV32I (`rv_iss`), used by the system-level tests.

## Top-level interface

`riscv_pipeline #(IMEM_BYTES = 4096, DMEM_BYTES = 4096, RESET_PC = 0)`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset (PC = `RESET_PC`, all pipeline registers bubbles, registers zero) |
| `imem_we`, `imem_waddr[31:0]`, `imem_wdata[31:0]` | in | writes one 32-bit word of program per cycle (byte address, word aligned); use while in reset |
| `dbg_reg_idx[4:0]` → `dbg_reg_data[31:0]` | in/out | combinational register read for test/debug |
| `retire`, `retire_pc[31:0]` | out | an instruction (not a bubble) is in WB this cycle, and its PC |
| `stall`, `flush` | out | load/use stall, or mispredict flush, this cycle |

The data memory has no external port. The only way to load data is with store
instructions; its contents after reset are undefined.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_riscv_pipeline \
    -y rtl -y tb +libext+.sv rtl/riscv_pkg.sv tb/rv_asm_pkg.sv tb/tb_riscv_pipeline.sv
./obj_dir/Vtb_riscv_pipeline
```

Use the same command with another `tb_*` top for a unit test. Every testbench
ends by printing `TB_RESULT checks=N failures=M`.

`tb_riscv_pipeline` runs at the default sizes and does the following:

* runs directed code for forwarding, load/use and branch/jump squashing;
* runs a mixed 16/32-bit program with hand-worked results;
* runs 40 random 200-instruction RV32I programs, with `rv_iss` in lockstep
  (retire order, final registers and data memory);
* runs a loop kernel (array fill, sum, bubble sort) and prints its CPI;
* fails if a stall, a taken branch, a jump, forwarding from each of EX, MEM
  and WB, or a compressed fetch never happened.

`tb_cpi_workload` builds programs with a set instruction mix and checks that
the measured CPI equals `1 + B/I`. It also checks that it lands near the
1.21 of the example above.

To write a program of your own, hold `rst_n` low, write words through
`imem_we`, release reset, and watch `retire`/`retire_pc`. Finish a program
with `jal x0, 0`, a self-loop, so that it is easy to detect.

## Departures and choices to know about

* **Instruction set.** RV32I plus RV32C, integer subset only. FENCE, ECALL,
  EBREAK and CSR instructions execute as no-ops. Illegal encodings also
  execute as no-ops; there are no traps or exceptions, and no interrupts.
* **Forwarding placement.** The operands are bypassed into Decode. A variant
  with the forwarding muxes at the ALU inputs (in EX) would behave the same at
  the instruction level and have the same penalties. It would have a shorter
  EX → ID path and extra muxes in EX.
* **Jumps** resolve in EX like taken branches and pay the same 2-cycle penalty.
  There is no branch predictor beyond "not taken".
* **Memories** are 4 KiB each, with an asynchronous read. That maps to
  distributed RAM or a register array, not to a synchronous-read SRAM macro.
  Addresses wrap modulo the size, and misaligned data accesses are not
  supported: an access stays within one 32-bit word.
* **Compressed code.** A 32-bit instruction fetched at PC reads the halfwords
  at PC and PC+2, so mixed-length code can be placed freely. The instruction
  memory's load port writes whole aligned words only.
* **Reset** clears the register file. It does not clear the data memory.
