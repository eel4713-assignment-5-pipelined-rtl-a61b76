# Five-stage pipelined MIPS core

This is a 32-bit MIPS integer core in SystemVerilog. It splits instruction
execution into the classic five stages (fetch, decode, execute, memory,
write-back) so that up to five instructions are in flight at once. Most of
the design is about keeping that overlap correct. Instructions that depend
on a result still in the pipeline get it through forwarding paths. A load
followed directly by a user of the loaded value costs one stall cycle. The
register file writes on the falling clock edge, which removes one class of
hazard outright. Jumps and taken branches redirect fetch from the memory
stage and throw away the three instructions fetched behind them.

Throughput is one instruction per cycle. The exceptions are a load-use pair,
which costs one extra cycle, and a taken branch or any jump, which costs
three extra cycles.

## Instruction set

| group | instructions |
|---|---|
| arithmetic | `add addu sub subu addi` (`add`, `sub`, `addi` report signed overflow) |
| logical | `and or nor andi ori lui sll srl` |
| compare | `slt sltu slti sltiu` |
| memory | `lw lhu lbu sw sh sb` |
| control | `beq bne j jal jr` |

Encodings are standard MIPS-I. `andi` and `ori` zero-extend their
immediate. Every other immediate is sign-extended, including `sltiu`'s,
which is then compared unsigned. `lhu` and `lbu` zero-extend. Byte lanes
are little-endian: byte offset 0 is bits 7:0 of the word. There are no
branch delay slots. `jal` writes the address of the next instruction
(PC+4) to `$31`. An opcode outside this table executes as a nop.

## The stages

| stage | contents | what it decides |
|---|---|---|
| IF | `pc_unit` (PC and PC+4 adder), `instr_mem` | fetch address |
| ID | `reg_file`, `control`, `extender`, jump mux | control word; j/jal target `{PC+4[31:28], instr[25:0], 00}` |
| EX | forwarding muxes, ALU-source mux, `alu_control`, `alu`, branch-target adder, JR mux, destination mux | ALU result; branch target; jr target (forwarded rs); destination `rt`, `rd` or `$31` |
| MEM | `branch_unit` (branch logic and branch mux), `mem_decoder`, `data_mem` | next PC; memory access |
| WB | memory-to-register mux | value written to the register file |

Between the stages sit four `pipe_reg` instances (IF/ID, ID/EX, EX/MEM,
MEM/WB). Each holds one of the stage structs in `mips_pkg`. The control
word decoded in ID (`ctrl_t`, in WB/M/EX groups) travels in every struct
from ID/EX onward. Each stage then reads the fields it needs. An all-zero
struct is a bubble: the instruction word is a nop, and the control word
writes neither a register nor memory.

Control transfers pass through three muxes in turn. The jump mux in ID
selects the j/jal target or PC+4. The JR mux in EX swaps in the forwarded
`rs` value for `jr`. The branch mux in MEM makes the final choice between
the branch target (beq/bne taken, from the ALU zero flag), the jump target
and the sequential PC+4.

## Hazards

This is the part to understand before changing anything.

**Forwarding into EX.** Each ALU operand goes through a four-input mux. The
select codes come from `forwarding_unit`:

| code | source | use |
|---|---|---|
| 0 | register value read in ID | no hazard |
| 1 | write-back data (MEM/WB) | producer two instructions ahead, including a load's data |
| 2 | EX/MEM result | producer one instruction ahead |
| 3 | zero | unused |

The nearer producer wins. Nothing is forwarded from an instruction that
does not write a register, or that writes `$0`.

The `rt` mux feeds the ALU-source mux and also the store-data path. So a
store gets a just-computed value the same way an ALU operand does. `jr`
takes its target from the `rs` mux, and branches compare in the ALU. This
means `jr` and branch operands need no stalls: they are served by the same
two muxes. `lui` is an ordinary ALU operation (the ALU moves the immediate
into the upper half). `jal`'s link value is put in the EX result field.
Both therefore forward like any other result, with no extra hardware.

**Falling-edge register file.** Write-back data is ready shortly after the
rising edge, and `reg_file` stores it on the falling edge of the same cycle.
An instruction in ID that reads this register therefore sees the new value
before ID/EX captures it. The producer three instructions ahead never needs
forwarding. The price is that the write-back mux, the register write, the
register read and the ID logic must all fit in half a cycle.

**Load-use stall.** A load's data exists only at the end of MEM. Suppose
the instruction right behind a load reads the loaded register (as a source,
a store value, a `jr` target or a branch operand). Then `hazard_unit` raises
`stall` for one cycle. The PC and IF/ID hold, and a bubble enters ID/EX. A
cycle later the load is in MEM/WB and forwarding code 1 supplies its data.
`control` tells the hazard unit whether the instruction actually reads `rs`
and `rt`. This avoids stalls caused by unused fields, such as `lui`'s `rs`
or `j`'s target bits.

**Control transfers.** Every redirect takes effect from MEM. When
`branch_unit` raises `redirect`, the PC loads the target. IF/ID, ID/EX and
EX/MEM are flushed to bubbles, because they hold the three instructions
fetched after the transfer. A redirect overrides a stall in the same cycle,
since the stalled instructions are being discarded anyway. An instruction
being flushed does not raise `overflow`.

**Cycle accounting** (checked by the end-to-end testbench). Instruction *k*
of a straight-line program is fetched in cycle *k* after reset and written
back in cycle *k*+4. A load-use pair writes back two cycles apart instead of
one. A taken branch fetches its target four cycles after itself instead of
one cycle after.

## Top-level interface (`mips_pipeline`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset (PC = 0, registers and stage registers cleared) |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, log2(IMEM_WORDS), 32 | write one instruction word per cycle (use while `rst` is high) |
| `dmem_we`, `dmem_waddr`, `dmem_wdata` | in | 1, log2(DMEM_WORDS), 32 | write one data word per cycle; takes priority over the pipeline's access |
| `dbg_reg_addr` → `dbg_reg_data` | in/out | 5 → 32 | read any register |
| `dbg_dmem_addr` → `dbg_dmem_data` | in/out | log2(DMEM_WORDS) → 32 | read any data word |
| `pc` | out | 32 | current fetch address |
| `overflow` | out | 1 | signed `add`/`addi`/`sub` in EX overflowed; the result is still written |

Parameters: `IMEM_WORDS` and `DMEM_WORDS` both default to 256 words.
Neither memory decodes high address bits. The instruction memory uses
`PC[9:2]`, so code linked at the usual `0x0040_0000` text base (as the
`j`/`jal` targets are) runs from word 0. The data memory uses address bits
9:2, so `0x1000_0000` is word 0. Both memories read asynchronously and
write on the rising edge.

## Where the design makes its own choices

The stage contents, the forwarding and stalling scheme, the falling-edge
register file, the four-input forwarding muxes and their codes 0 and 2, and
resolving branches, jumps and `jr` in MEM all follow the processor this RTL
models. These points are choices of this RTL:

- **Flushing, no delay slots.** A taken transfer squashes the three younger
  instructions. A program written for MIPS delay slots behaves differently.
- **Forwarding code 1** is the write-back value.
- **Store data** is forwarded through the regular EX mux. The design this
  RTL follows forwarded store data late, inside the memory decoding unit;
  the result is the same.
- **Link value.** `jal` puts PC+4 into the EX result, rather than giving the
  write-back mux a third input. This also makes the link value forwardable.
- **Overflow** only raises a flag. There is no exception mechanism, and the
  wrapped result is written.
- **Memories** read asynchronously, are 256 words deep, and are loaded
  through ports. The original used FPGA RAM blocks filled from
  initialisation files. A synchronous-read RAM would require a change in
  MEM: clock the data RAM on the falling edge, or add a stage.
- **Reset** puts the PC at 0.

## Files

- `rtl/mips_pkg.sv`: opcodes, function codes, ALU operation classes,
  control word and stage structs.
- `rtl/mips_pipeline.sv`: top level; stage wiring, muxes, stall and flush
  control.
- `rtl/pc_unit.sv`, `instr_mem.sv`, `reg_file.sv`, `control.sv`,
  `extender.sv`, `alu_control.sv`, `alu.sv`, `forwarding_unit.sv`,
  `hazard_unit.sv`, `branch_unit.sv`, `mem_decoder.sv`, `data_mem.sv`,
  `pipe_reg.sv`: one block each, described in each file's opening comment.
- `tb/mips_asm_pkg.sv`: an instruction encoder per instruction, and
  `mips_iss`, an unpipelined reference model of the same instruction set.
- `tb/tb_<block>.sv`: a self-checking testbench for each block.
  `tb/tb_mips_pipeline.sv` is the end-to-end test.

## Simulating

Verilator 5, from the repository root:

```sh
verilator --binary --timing --top-module tb_mips_pipeline -Irtl -Itb \
  rtl/mips_pkg.sv tb/mips_asm_pkg.sv \
  $(ls rtl/*.sv | grep -v mips_pkg) tb/tb_mips_pipeline.sv -o sim
./obj_dir/sim
```

Any block test runs the same way with its own `--top-module` and
testbench. Every testbench ends with the line
`TB_RESULT checks=N failures=M`, and each has a watchdog that fails the
run if it hangs.

`tb_mips_pipeline` runs the core with its default parameters. The
programs it runs:

- one test per instruction group (`jr` through forwarded `lui`/`ori`,
  logical operations, branches, set-less-than, add/sub with an overflow,
  sb/sh/sw followed by lw, lw/lhu/lbu);
- a counted loop with a `jal`/`jr` subroutine;
- the original design's hazard program, a byte-mixing loop; its final
  registers must be `$1=0x03020100`, `$2=0x0b0a0908`, `$3=0x0316ff10` and
  `$4=0x110a0908`;
- twelve random 180-instruction programs with dense dependences, loads,
  stores and forward branches.

Each program also runs on `mips_iss`. Afterwards all registers and the
whole data memory must match the model. The testbench also checks the cycle
accounting above. It counts every forwarding path, store-data forwarding,
load-use stalls, taken branches, `j`, `jal`, `jr` and overflow, and fails
if any of them never happened. It takes a few seconds.

To run your own program, put its words in `prog` (using the encoder
functions) and call `load_and_run`, as the existing cases do. The program
must end in a jump to itself.
