# A five-stage pipelined RV32I processor

This is a 32-bit RISC-V processor that runs a subset of the RV32I base
instruction set. Each instruction passes through five stages: fetch, decode,
execute, memory and writeback. Up to five instructions are in flight at once,
and in the best case one completes every clock cycle. Overlapping instructions
creates hazards: an instruction may need a result that is not yet in the
register file, or may already have been fetched behind a branch that turns out
to be taken. A hazard unit resolves them in three ways:

- it forwards results from later pipeline registers;
- it stalls for one cycle behind a load;
- it flushes wrongly fetched instructions.

The processor has three units. `control_unit` decodes, `hazard_unit`
watches register numbers across the stages, and `datapath_unit` moves the
data. Together they form the core `riscv_pip_27`. The top module `top` joins
the core to a 1024-word instruction memory and a 1024-word data memory.

## Instruction set

| Kind | Instructions | Notes |
|---|---|---|
| Register-register | `add sub and or xor slt sll srl` | `sub` is picked by funct7 bit 5 together with opcode bit 5 |
| Register-immediate | `addi andi ori xori slti slli srli` | |
| Memory | `lw sw` | 32-bit aligned words only |
| Branch | `beq bne blt bge` | resolved in execute |
| Jump | `jal jalr` | the link register gets PC+4 |
| Upper immediate | `lui` | computed as 0 + immediate in the ALU |

The following are not supported:

- `auipc`, byte and halfword loads and stores, `sltu`/`sltiu`, arithmetic right shifts, system instructions.
- An unsupported opcode does nothing: it writes no register and no memory.
- `bltu`/`bgeu` behave as the signed `blt`/`bge`.
- `sltu` decodes as `add`, and `sra`/`srai` decode as `srl`/`srli`.

The ALU can also multiply and divide (operation codes 4 and 5). No
instruction selects these operations, because the ALU decoder has no input
that can tell an RV32M instruction from the base ones.

## The pipeline

```
   fetch            decode              execute              memory          writeback
  PC --> imem --|IF/ID|--> regfile --|ID/IEx|--> fwd muxes --|IEx/IMem|--> dmem --|IMem/IW|--> result_mux
   ^             |       extend     |          ALU, +imm   |                |                  |
   |             |    control_unit  |          branch test  |                |                  |
   +---- pc_mux <------------------------- PCSrcE --------+                |                  |
                                        ^  ^                               |                  |
                                        |  +------- ALUResultM ------------+                  |
                                        +---------- ResultW ----------------------------------+
```

| Stage | What happens | Registers it fills |
|---|---|---|
| Fetch | `PCF` addresses `imem`. `pc_mux` picks the next PC (see the table below). `PCF` holds while `StallF` is high. | IF/ID (`if_id`): instruction, PC, PC+4 |
| Decode | Registers rs1 (`instr[19:15]`) and rs2 (`instr[24:20]`) are read. `extend` builds the immediate. `control_unit` produces the control word. | ID/IEx (`id_iex`): control word, the two register values, PC, rs1, rs2, rd, immediate, PC+4, funct3 |
| Execute | The forwarding muxes choose each operand, then the ALU computes. `PCTargetE = PC + imm`. The branch condition and `PCSrcE` are computed here. | IEx/IMem (`iex_imem`): RegWrite, ResultSrc, MemWrite, ALU result, store data, rd, PC+4 |
| Memory | `ALUResultM` addresses `dmem`. A store is written on the next rising edge, and a load reads combinationally. | IMem/IW (`imem_iw`): RegWrite, ResultSrc, ALU result, loaded word, rd, PC+4 |
| Writeback | `result_mux` picks the ALU result (00), the loaded word (01) or PC+4 (10). The result goes to the register file write port. | register file |

`pc_mux` chooses the next PC as follows:

| `pc_sel` | Next PC | Used for |
|---|---|---|
| 00 | PC+4 | sequential fetch |
| 01 | `PCTargetE` | a taken branch or `jal` |
| 10 | the ALU result with bit 0 cleared | `jalr` |
| 11 | PC+4 | |

Every pipeline register has `enable` and `clear` inputs:

- `clear` and `reset` load all zeros, and all zeros is a bubble: its opcode decodes to "do nothing".
- Only IF/ID uses `enable`. It is driven with `!StallD`.
- Only IF/ID and ID/IEx use `clear`. They are driven with `FlushD` and `FlushE`.

The register file writes on the rising edge and is *write-through*: a read
of the register being written in the same cycle returns the new value. As a
result, an instruction in decode sees a result that is in writeback at the
same time. No forwarding path is needed for that distance.

Each pipeline register also carries the PC and the instruction word up to
writeback. No logic uses them there. They let a simulation see which
instruction retires in each cycle, and the testbenches rely on them.

## Hazards

This is the part of the design that needs the most care. All of the logic is
in `hazard_unit.sv` and is purely combinational.

**Forwarding (`ForwardAE`, `ForwardBE`).** Consider an instruction in execute
whose source register is the destination of the instruction in memory
(`RegWriteM`, `RdM`). It takes `ALUResultM` (select `10`). If instead the
source matches the instruction in writeback (`RegWriteW`, `RdW`), it takes
`ResultW` (select `01`). Otherwise it uses the value read in decode (`00`).
The memory stage wins when both match, because it holds the newer value.
Register x0 is never forwarded. Operand B is forwarded before the
immediate mux, so a store also gets forwarded store data.

**Load-use stall (`StallF`, `StallD`, `FlushE`).** A loaded word exists only
at the end of the memory stage. It cannot be forwarded to an instruction
directly behind the load. Suppose the instruction in execute is a load
(`ResultSrcE[0]`) and its `RdE` is a source of the instruction in decode.
Then the PC and IF/ID hold for one cycle, and a bubble goes into ID/IEx. When
the dependent instruction reaches execute, the load is in writeback, and the
word arrives through the `ResultW` forwarding path.

```
cycle:            1    2    3    4    5    6
lw  x2, 96(x0)    F    D    E    M    W
add x9, x2, x5         F    D    D*   E    M      * held; a bubble enters E in cycle 4
                                      ^ ForwardAE = 01 (ResultW) in cycle 5
```

**Control hazards (`FlushD`, `FlushE`).** Branches and jumps are resolved in
execute. When `PCSrcE` is high (a taken branch, `jal` or `jalr`), two
younger instructions have already been fetched: one is in decode and one in
fetch. At the next edge, `FlushE` turns the one moving from decode into
execute into a bubble. `FlushD` does the same for the one moving from fetch
into decode. The PC meanwhile loads the target. A taken branch or jump therefore costs two
cycles, and a branch that is not taken costs nothing. There is no branch
prediction.

The branch condition is
`BranchE & ((funct3[2] ? SignE : ZeroE) ^ funct3[0])`:

- `ZeroE` is "ALU result is zero", where the ALU subtracts for a branch.
- `SignE` is the overflow-correct signed `a < b`.

A stall and a flush cannot arise from the same instruction: a load never
branches. There are no structural hazards, because instruction and data
memories are separate and the register file is write-through.

## Control

`maindec` maps the opcode to the control word:

| Opcode | RegWrite | ResultSrc | MemWrite | Branch | Jump | ALUOp | ALUSrcA | ALUSrcB | ImmSrc | PCJalSrc |
|---|---|---|---|---|---|---|---|---|---|---|
| R-type `0110011` | 1 | ALU | 0 | 0 | 0 | funct | rs1 | rs2 | – | 0 |
| I-type `0010011` | 1 | ALU | 0 | 0 | 0 | funct | rs1 | imm | I | 0 |
| `lw` `0000011` | 1 | mem | 0 | 0 | 0 | add | rs1 | imm | I | 0 |
| `sw` `0100011` | 0 | – | 1 | 0 | 0 | add | rs1 | imm | S | 0 |
| branch `1100011` | 0 | – | 0 | 1 | 0 | sub | rs1 | rs2 | B | 0 |
| `jal` `1101111` | 1 | PC+4 | 0 | 0 | 1 | – | – | – | J | 0 |
| `jalr` `1100111` | 1 | PC+4 | 0 | 0 | 1 | add | rs1 | imm | I | 1 |
| `lui` `0110111` | 1 | ALU | 0 | 0 | 0 | add | zero | imm | U | 0 |

`aludec` turns ALUOp (00 add, 01 sub, 10 by funct3) into a 4-bit ALU
operation. For funct3 = 000, it subtracts only when `funct7[5] & opcode[5]`.
This is true only for R-type `sub`, so an `addi` whose immediate has bit 10
set still adds.

| ALU code | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| operation | ADD | SUB | AND | OR | MUL | DIV | XOR | SLT | SLL | SRL |

## Memories and the test program

`imem` is read combinationally at `PCF[11:2]`. It is loaded at start-up with
`$readmemh` from its `INIT_FILE` parameter. `top` passes
`rtl/riscvtest.hex` by default, and the path is relative to the directory the
simulator runs in.

`dmem` works as follows:

- It is addressed at `ALUResultM[11:2]`.
- It reads combinationally and writes on the rising edge.
- It starts at zero.

Both memories wrap addresses beyond 4 KiB.

`rtl/riscvtest.hex` is a 36-instruction test program, listed in its own
comments. Its labels are `main`, `around`, `wrong`, `end` and `done`. It
exercises:

- forwarding from both stages;
- a load-use stall;
- taken and not-taken `beq`, plus `bne`, `blt`, `bge`;
- `jal`, `jalr` and `lui`;
- the store `sw x7, 84(x3)` (`0x0471aa23`).

When it finishes, data memory holds 7 at byte address 96, 25 at 100, and
0x12345 at 108. Address 104 is written only if a branch goes to `wrong`.
After reset the program reaches the final branch-to-self at `done` in 39
cycles.

## Files

| File | Contents |
|---|---|
| `rtl/riscv_pkg.sv` | opcodes, ALU codes, selects, the control word and the four pipeline-register structs |
| `rtl/top.sv` | core + `imem` + `dmem` |
| `rtl/riscv_pip_27.sv` | core: `control_unit` + `hazard_unit` + `datapath_unit` |
| `rtl/control_unit.sv`, `maindec.sv`, `aludec.sv` | decode |
| `rtl/hazard_unit.sv` | forwarding, stall and flush |
| `rtl/datapath_unit.sv` | the five stages; uses `pc_mux`, `if_id`, `regfile`, `extend`, `id_iex`, `alu`, `iex_imem`, `imem_iw`, `result_mux` |
| `rtl/imem.sv`, `rtl/dmem.sv` | memories |
| `tb/rv_iss_pkg.sv` | reference instruction-set model, instruction encoders and a random program generator, for testbenches only |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Run from the directory that holds `rtl/` and `tb/`. Example for the whole
processor:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/riscv_pkg.sv tb/rv_iss_pkg.sv tb/tb_top.sv --top-module tb_top
./obj_dir/Vtb_top
```

Substitute any `tb_<module>` to run another testbench. Each one prints a
single line `TB_RESULT checks=N failures=M` and stops.

What the testbenches check:

- **`tb_top`** runs the default program at the default sizes. It checks every
  retired instruction and every store against the reference model, then the
  final memory words. It also checks that the first instruction is in
  writeback in the fifth cycle after reset. It counts forwarding from each
  stage, load-use stalls, taken branches, `jal` and `jalr`, and fails if any
  never happened.
- **`tb_riscv_pip_27`** runs 40 random 120-instruction programs on the core
  with testbench memories. The programs use only forward branches and jumps,
  use registers x1–x7 to make hazards frequent, and use x0-relative loads and
  stores. For each program it compares every retired instruction, the final
  register file and data memory against the reference model.
- **`tb_datapath_unit`** drives the hazard inputs itself and inserts random
  bubbles.
- The other testbenches check single modules against values worked out in
  the testbench.

The random tests use `$urandom`. Pass `+verilator+seed+N` to the simulation
binary to vary the seed.

## What is taken from the source design and what is not

The following come from the source design:

- the five-stage structure;
- the module breakdown and names;
- the pipeline signal names (`PCSrcE`, `ForwardAE`, `StallF`, `FlushD`, `ResultSrcW`, `PCJalSrcE`, `SignE`, …);
- the `pc_mux` select encoding;
- the three-input writeback mux;
- `RTypeSub = funct7b5 & opb5`;
- ALU codes 0–6;
- the 32 × 32 register file;
- the 1024-word memories.

The following are this design's own choices:

- **Hazard rules and forward-mux order.** The source names the hazard signals but does not give the rules, or which forwarding input is which.
- **Branch condition gates.** The source shows only that `ZeroE`, `SignE` and funct3 bits 0 and 2 feed them.
- **ALU codes 7–9** and the 4-bit ALU code.
- **Opcode set and 2-bit ALUOp.**
- **`lui` through a zero A operand.**
- **Write-through register file.** The source does not say which edge writes.
- **Reset.** It is synchronous, clears the register file and pipeline, and the PC starts at 0.
- **Word-only memory access.**
- **The test program.**

The source's ALU-decoder waveform maps opcodes to ALU codes in a way that
disagrees with its own ALU codes: stores would subtract and branches
multiply. It was not followed.
