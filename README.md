# A single-cycle RV32I processor

This is a RISC-V processor for the 32-bit base integer instruction set (RV32I).
It executes exactly one instruction per clock cycle. Nothing is pipelined and
nothing stalls. During each cycle, one pass of combinational logic does all of
the following work:

- reads the instruction at the program counter;
- decodes it;
- reads its two source registers;
- builds its immediate;
- computes in the ALU;
- reads or writes the data memory.

At the rising clock edge, three state elements update together: the PC, the
destination register and the data memory. This only works because every state
element reads without a clock (asynchronous read) and writes on the clock edge
(synchronous write).

The machine is the classic "datapath + controller + external memory" split.
Instructions and data live in two separate memories, so a load or store can
run in the same cycle as the instruction fetch.

```
            +----------------------------- riscv_top ------------------------------+
            |  +------+        +---------------- riscv_cpu -----------------+      |
 prog_* --->|  | imem |--inst->|  control  <--- inst, br_eq, br_lt          |      |
            |  |      |<--pc---|     | ctrl (ImmSel RegWEn ASel BSel ALUSel  |      |
            |  +------+        |     v       MemRW WBSel PCSel BrUn)         |      |
            |                  |  datapath: pc_unit, regfile, imm_gen, alu,  |      |
            |  +------+<-addr--|            branch_comp, store_align,        |      |
            |  | dmem |<-we,wd-|            load_extend, operand/WB muxes    |      |
            |  +------+--rd--->|                                             |      |
            |                  +---------------------------------------------+      |
            +-----------------------------------------------------------------------+
```

## What happens in one cycle

Take `add x1, x2, x3` at PC 0x1000:

1. **Fetch.** `pc` drives the instruction memory's address. The instruction
   appears on `inst` within the cycle.
2. **Decode and register read.** `inst[19:15]` and `inst[24:20]` address the
   two read ports of the register file. `inst[11:7]` addresses the write port.
   The control logic decodes `inst[6:0]`, `inst[14:12]` and `inst[30]`.
3. **Execute.** The ALU adds `Reg[2]` and `Reg[3]`.
4. **Memory.** Not used by `add`. For a load or store, the ALU result is the
   byte address.
5. **Write back.** The sum is waiting at the register file's write port.

At the rising edge, `x1` takes the sum and the PC becomes 0x1004. The next
instruction starts. If the instruction at 0x1004 reads `x1`, it sees the new
value; a read of `x1` earlier in the 0x1000 cycle saw the old one.

The clock period must cover the whole path. The longest path is a load:
IMEM read → register read → ALU → DMEM read → byte extraction → register-file
setup.

## The datapath and its control signals

Each instruction class uses the datapath through a few multiplexers and
enables. The control logic (`control.sv`) sets them from the instruction
alone. The one exception is PCSel for a conditional branch, which also
depends on the branch comparator's flags.

| Signal | Meaning |
|---|---|
| `RegWEn` | write `wb` into `rd` at the edge (writes to `x0` are dropped) |
| `ImmSel` | immediate format: I, S, B, U or J |
| `ASel` | ALU operand A: 0 = `Reg[rs1]`, 1 = `pc` |
| `BSel` | ALU operand B: 0 = `Reg[rs2]`, 1 = immediate |
| `ALUSel` | ALU operation (ADD = 0, SUB = 1, then SLL, SLT, SLTU, XOR, SRL, SRA, OR, AND, PASSB) |
| `MemRW` | Read or Write the data memory |
| `WBSel` | value written back: 0 = loaded data, 1 = ALU result, 2 = `pc+4` |
| `PCSel` | next PC: 0 = `pc+4`, 1 = ALU result with bit 0 cleared |
| `BrUn` | branch comparison unsigned (BLTU/BGEU) |

| Class | ImmSel | RegWEn | ASel | BSel | ALUSel | MemRW | WBSel | PCSel |
|---|---|---|---|---|---|---|---|---|
| R-type (`add`, `sub`, ...) | – | 1 | rs1 | rs2 | funct3/funct7 | Read | alu | +4 |
| I-type ALU (`addi`, ...) | I | 1 | rs1 | imm | funct3 (+inst[30] for SRAI) | Read | alu | +4 |
| load (`lb` ... `lhu`) | I | 1 | rs1 | imm | ADD | Read | mem | +4 |
| store (`sb`, `sh`, `sw`) | S | 0 | rs1 | imm | ADD | Write | – | +4 |
| branch | B | 0 | pc | imm | ADD | Read | – | taken |
| `jal` | J | 1 | pc | imm | ADD | Read | pc+4 | 1 |
| `jalr` | I | 1 | rs1 | imm | ADD | Read | pc+4 | 1 |
| `lui` | U | 1 | – | imm | PASSB | Read | alu | +4 |
| `auipc` | U | 1 | pc | imm | ADD | Read | alu | +4 |

The ALU is the only adder for addresses and targets. For a branch it computes
`pc + imm` while a separate comparator (`branch_comp.sv`) compares `rs1` with
`rs2`. From the two flags `br_eq` and `br_lt` and `funct3`, the control logic
decides whether the branch is taken:

- BEQ and BNE use `br_eq`.
- BLT, BLTU, BGE and BGEU use `br_lt` or its inverse.
- `BrUn = funct3[1]` makes the comparison unsigned for BLTU and BGEU.

### Immediates

`imm_gen.sv` rebuilds the immediate from the instruction bits. The sign bit
is always `inst[31]`.

| Format | imm[31:0] |
|---|---|
| I | `inst[31]`×21, `inst[30:25]`, `inst[24:20]` |
| S | `inst[31]`×21, `inst[30:25]`, `inst[11:7]` |
| B | `inst[31]`×20, `inst[7]`, `inst[30:25]`, `inst[11:8]`, 0 |
| U | `inst[31:12]`, 0×12 |
| J | `inst[31]`×12, `inst[19:12]`, `inst[20]`, `inst[30:21]`, 0 |

For I and S, only the low five bits move: a 5-bit multiplexer chooses between
`inst[24:20]` and `inst[11:7]`. Every other bit comes from a fixed position.

### Bytes and halfwords

Both memories are arrays of 32-bit words. The low two address bits are not
used to index them.

- **Loads.** The data memory returns the whole word. `load_extend.sv` picks
  the addressed byte or halfword (little-endian), then sign-extends it (LB, LH)
  or zero-extends it (LBU, LHU).
- **Stores.** `store_align.sv` turns the width and the low two address bits
  into four byte-write enables. It also copies the byte or halfword onto every
  lane, so whichever lanes are enabled receive the right data.

A halfword or word access whose address is not aligned to its size is not
split across two words. It acts on the word that holds its first byte, so
software must keep accesses aligned.

### What is not executed

- `FENCE` and `FENCE.I` are no-ops. With no caches and one instruction at a
  time, there is nothing to order.
- `ECALL`, `EBREAK`, the six CSR instructions and any other encoding raise
  `illegal` for that cycle. They write nothing, and the PC moves on by 4.

The design has no traps, no CSRs and no interrupts.

## Interfaces and timing

`riscv_top` parameters: `IMEM_WORDS` (default 1024), `DMEM_WORDS` (1024),
`RESET_PC` (0).

| Port | Dir | Width | Description |
|---|---|---|---|
| `clk` | in | 1 | all state changes on the rising edge |
| `rst` | in | 1 | synchronous, active high: `pc <= RESET_PC` |
| `prog_we`, `prog_addr`, `prog_wdata` | in | 1/32/32 | write one instruction word into IMEM (byte address) |
| `pc`, `inst` | out | 32/32 | instruction executing this cycle |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | 1/5/32 | register write this instruction makes at the next edge |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | out | 4/32/32 | data-memory byte write this instruction makes |
| `illegal` | out | 1 | instruction not recognised |

To use it:

1. Load a program while `rst` is high, one word per clock through `prog_*`.
2. Release `rst`. The instruction at `RESET_PC` executes in the cycle in which
   `rst` goes low.
3. From then on, the observation outputs describe the instruction that
   commits at the next rising edge.

The processor never writes the instruction memory. Registers other than `x0`,
and the contents of both memories, are not cleared by reset. The memories
start at zero in simulation; an all-zero word decodes as `illegal` and acts
as a no-op.

`riscv_cpu` has the same behaviour without the memories. It drives
`imem_addr`, `dmem_addr`, `dmem_we` and `dmem_wdata`, and expects `imem_rdata`
and `dmem_rdata` back in the same cycle, combinationally.

## Files

| File | Contents |
|---|---|
| `rtl/riscv_pkg.sv` | opcodes, funct3 codes, control-signal enums, `ctrl_t` bundle |
| `rtl/riscv_top.sv` | processor + IMEM + DMEM |
| `rtl/riscv_cpu.sv` | control + datapath |
| `rtl/control.sv` | instruction decoder |
| `rtl/datapath.sv` | operand and write-back muxes, wiring of the units below |
| `rtl/pc_unit.sv` | PC register, +4 adder, next-PC mux |
| `rtl/regfile.sv` | 32 × 32-bit registers, 2 read / 1 write, `x0` = 0 |
| `rtl/imm_gen.sv` | immediate generator |
| `rtl/alu.sv` | ALU |
| `rtl/branch_comp.sv` | branch comparator |
| `rtl/load_extend.sv`, `rtl/store_align.sv` | byte/halfword handling |
| `rtl/imem.sv`, `rtl/dmem.sv` | memories |
| `tb/rv_tb_pkg.sv` | instruction encoders, random program generator, reference instruction-set model |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

- **Unit testbenches.** Each one compares its module against values the
  testbench works out itself. Examples: ALU results from the RV32I
  definitions; immediates checked by encoding a random immediate and decoding
  it back; a model array for the register file and memories.
- **Integration testbenches.** `tb_riscv_cpu`, `tb_datapath` and
  `tb_riscv_top` run programs in lockstep with `rv_iss`, a separately written
  instruction-set model. Every cycle they compare the PC, the instruction,
  the register write, the byte-enabled memory write and the `illegal` flag.

`tb_riscv_top` runs the top at its default sizes. Its program has two parts:

- **Textbook examples.** `add x1,x2,x3`, `add x6,x7,x9`, a `sub`,
  `addi x15,x1,-50`, `sw x14,8(x2)` and `lw x14,8(x2)`, with results worked
  out by hand. The encodings of the `addi`, `lw` and `sw` are checked against
  their known bit patterns.
- **A random program.** About 900 words, covering every RV32I class.

The random program's control flow only goes forward, so it ends in a
self-loop. The testbench counts each instruction class, taken and untaken
branches, writes to `x0`, and unrecognised instructions; a class that never
occurs counts as a failure. It also checks that N instructions took N cycles.

Every testbench was also run against a copy of its module with one deliberate
bug. All of them reported failures.

To run one with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/riscv_pkg.sv tb/rv_tb_pkg.sv \
    rtl/*.sv tb/tb_riscv_top.sv --top-module tb_riscv_top -o sim
./obj_dir/sim
```

Replace `tb_riscv_top` with any other `tb_<module>`. All runs finish in
seconds.

## Design choices

These are this design's own choices, beyond the basic single-cycle
organisation:

- **Memory sizes and reset PC.** Each memory holds 1024 words (4 KiB) and
  wraps above that. The reset PC is 0. Change them with the parameters.
- **Program loading.** The IMEM load port is for a host or testbench. The
  processor itself only reads IMEM.
- **Byte enables.** The data memory has four byte write enables instead of a
  single write enable, so that SB and SH work.
- **Branches and jumps.** These use an A-operand mux (`ASel`), a third
  write-back input (`pc+4`), a separate branch comparator, and the ALU as
  target adder (`PCSel`). They follow the usual way of extending this
  datapath to branches and jumps.
- **ALUSel codes.** Only ADD = 0 and SUB = 1 are fixed. The other ALUSel
  codes, the ImmSel codes and WBSel = 2 are arbitrary.
- **Unrecognised instructions** do nothing but advance the PC.
- **Instruction and data caches** could later replace IMEM and DMEM. They are
  not part of this design.
