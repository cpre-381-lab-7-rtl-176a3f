# Single-cycle MIPS-subset datapath

This is a processor that finishes every instruction in one clock cycle. It
runs a small subset of MIPS: the R-format instructions `add`, `sub`, `and`,
`or` and `slt`, plus `lw`, `sw` and `beq`. In one cycle the program counter
(PC) addresses the instruction memory and the opcode is decoded. The two
source registers are read. The ALU computes, and the data memory is read or
written. At the next rising clock edge the result goes into a register and
the PC moves on. Nothing is pipelined and there is no multi-cycle state. The
only sequential elements are the PC, the register file and the data memory.
This is the classic textbook single-cycle organisation. It is built here from
small, separately tested units: control, ALU control, ALU, register file,
memories, adders, multiplexers and sign extender.

Two choices set this build apart from the usual textbook drawing:

* **Both memories are addressed in words, not bytes.** The PC counts
  instructions, so the PC adder adds 1 instead of 4. A branch offset counts
  words, so there is no shift-left-by-2 unit in the branch path.
* **Only an 8-bit immediate is used.** The sign extender reads
  `instruction[7:0]`. Bits 15:8 of a MIPS immediate field are ignored. Load,
  store and branch offsets must therefore lie in -128..127.

## Instructions

| instruction          | encoding (fields)                         | effect                                        |
|----------------------|-------------------------------------------|-----------------------------------------------|
| `add rd, rs, rt`     | `000000 rs rt rd xxxxx 100000`            | rd = rs + rt (wraps, no overflow trap)        |
| `sub rd, rs, rt`     | `000000 rs rt rd xxxxx 100010`            | rd = rs - rt                                  |
| `and rd, rs, rt`     | `000000 rs rt rd xxxxx 100100`            | rd = rs & rt                                  |
| `or  rd, rs, rt`     | `000000 rs rt rd xxxxx 100101`            | rd = rs \| rt                                 |
| `slt rd, rs, rt`     | `000000 rs rt rd xxxxx 101010`            | rd = (rs < rt, signed) ? 1 : 0                |
| `lw  rt, off(rs)`    | `100011 rs rt xxxxxxxx off[7:0]`          | rt = dmem[(rs + off) mod 256]                 |
| `sw  rt, off(rs)`    | `101011 rs rt xxxxxxxx off[7:0]`          | dmem[(rs + off) mod 256] = rt                 |
| `beq rs, rt, off`    | `000100 rs rt xxxxxxxx off[7:0]`          | if rs == rt: PC = PC + 1 + off (in words)     |

The ALU control looks only at `funct[3:0]`. So any R-format function code
whose low four bits match one of the rows above performs that operation, and
an R-format funct it does not know performs `add`. An opcode outside the
four above decodes to "all control signals 0". Such an instruction writes
nothing and only advances the PC. Register 0 always reads 0, and writes to it
are dropped. `add $0,$0,$0` (all zeros) is therefore a no-op, and an empty
memory word holds that no-op.

Addresses are word numbers. The data memory address is the low 8 bits of the
ALU result, and PC arithmetic wraps modulo 256.

## One cycle through the datapath

```
fetch      PC ──> instr_mem ──> instr
           PC ──> adder(+1) ──> PC+1
decode     instr[31:26] ──> control_unit ──> RegDst ALUSrc MemtoReg RegWrite
                                             MemRead MemWrite Branch ALUOp
           instr[25:21] (rs) ──> reg_file read port 1 ──> A
           instr[20:16] (rt) ──> reg_file read port 2 ──> B
           instr[7:0]        ──> sign_extend ──> imm
           ALUOp, instr[5:0] ──> alu_control ──> ALU op
execute    ALU(A, ALUSrc ? imm : B) ──> result, Zero
           adder(PC+1, imm) ──> branch target
memory     data_mem[result] read (MemRead) / write B (MemWrite, at edge)
writeback  reg_file[RegDst ? rd : rt] <= MemtoReg ? read data : result   (RegWrite, at edge)
next PC    PC <= (Branch & Zero) ? branch target : PC+1                   (at edge)
```

The four multiplexers, with what each input selects:

| mux      | select     | input 0              | input 1                  |
|----------|------------|----------------------|--------------------------|
| RegDst   | `RegDst`   | rt, `instr[20:16]`   | rd, `instr[15:11]`       |
| ALUSrc   | `ALUSrc`   | register rt          | sign-extended immediate  |
| MemtoReg | `MemtoReg` | ALU result           | data-memory read data    |
| PC source| Branch & Zero | PC + 1            | branch target            |

A branch is taken when the control asserts `Branch` and the ALU's `Zero`
output is 1. For `beq` the ALU subtracts rt from rs, so `Zero` means "equal".

### Main control (`control_unit`)

| opcode            | RegDst | ALUSrc | MemtoReg | RegWrite | MemRead | MemWrite | Branch | ALUOp |
|-------------------|:------:|:------:|:--------:|:--------:|:-------:|:--------:|:------:|:-----:|
| 000000 (R-format) | 1 | 0 | 0 | 1 | 0 | 0 | 0 | 10 |
| 100011 (lw)       | 0 | 1 | 1 | 1 | 1 | 0 | 0 | 00 |
| 101011 (sw)       | 0*| 1 | 0*| 0 | 0 | 1 | 0 | 00 |
| 000100 (beq)      | 0*| 0 | 0*| 0 | 0 | 0 | 1 | 01 |

Entries marked * are don't-cares in the specification. This build drives
them 0.

### ALU control (`alu_control`) and ALU operations

| ALUOp | funct[3:0] | ALU op | meaning               |
|-------|------------|--------|-----------------------|
| 00    | -          | 010    | add (lw/sw address)   |
| x1    | -          | 110    | subtract (beq)        |
| 1x    | 0000       | 010    | add                   |
| 1x    | 0010       | 110    | subtract              |
| 1x    | 0100       | 000    | AND                   |
| 1x    | 0101       | 001    | OR                    |
| 1x    | 1010       | 111    | set on less than (signed) |

Codes 011, 100 and 101 are never produced, and the ALU returns 0 for them.
Both control units are purely combinational. They have no flip-flops and
no latches.

## Timing and reset

* One instruction per clock. Every path is combinational within a cycle:
  instruction read, register read, ALU, data-memory read and write-back mux.
  The critical path runs PC → instruction memory → register file → ALU →
  data memory → MemtoReg mux → register-file input.
* The register file, the data memory and the PC all update at the rising
  edge. An instruction that reads a register written by the previous
  instruction sees the new value.
* Reads of the register file and of both memories are asynchronous. The
  data-memory read port outputs 0 while `MemRead` is low.
* `rst` is synchronous and active high. It sets the PC to 0 and clears all
  registers. No store happens while `rst` is high. The memories are not
  reset. They hold their initialization-file contents.

## Register-file organisations

`DATA_W` (datapath width) and `REG_AW` (log2 of the register count) are
parameters of the top:

* `DATA_W=32, REG_AW=5` (default): 32 registers of 32 bits, with MIPS
  register numbering.
* `DATA_W=16, REG_AW=4`: 16 registers of 16 bits. Each 5-bit register field
  uses only its low 4 bits, so its top bit is ignored. The ALU and the data
  memory shrink to 16 bits too. Instructions stay 32 bits wide. The default
  data file holds 32-bit words, so give `DMEM_INIT` a file of 16-bit words
  (or `""`) in this organisation.

## Memories and initialization files

`instr_mem` is a 256 x 32 ROM. `data_mem` is a 256 x `DATA_W` RAM. Both
load their contents at time 0 with `$readmemh`. The file holds one
hexadecimal word per line, word 0 first, and words the file leaves out are 0.
The top's `IMEM_INIT` and `DMEM_INIT` parameters name the files. The paths
are relative to the directory the simulator runs in, and the defaults assume
the repository root. The default files hold a demonstration program:

| word | instruction          | result                                   |
|-----:|----------------------|------------------------------------------|
| 0  | `lw  $1, 0($0)`       | $1 = 5                                   |
| 1  | `lw  $2, 1($0)`       | $2 = 7                                   |
| 2  | `add $3, $1, $2`      | $3 = 12                                  |
| 3  | `sub $4, $2, $1`      | $4 = 2                                   |
| 4  | `and $5, $1, $2`      | $5 = 5                                   |
| 5  | `or  $6, $1, $2`      | $6 = 7                                   |
| 6  | `slt $7, $1, $2`      | $7 = 1                                   |
| 7  | `slt $8, $2, $1`      | $8 = 0                                   |
| 8  | `sw  $3, 4($0)`       | mem[4] = 12                              |
| 9  | `beq $1, $2, +2`      | not taken                                |
| 10 | `lw  $9, 2($0)`       | $9 = -3                                  |
| 11 | `slt $10, $9, $1`     | $10 = 1 (signed compare)                 |
| 12 | `beq $1, $1, +1`      | taken, skips word 13                     |
| 13 | `add $11, $1, $1`     | skipped                                  |
| 14 | `sw  $4, -1($3)`      | mem[11] = 2 (negative offset)            |
| 15 | `lw  $12, 4($0)`      | $12 = 12                                 |
| 16 | `add $0, $1, $2`      | no effect ($0 stays 0)                   |
| 17 | `lw  $13, -9($3)`     | $13 = 0x80000000                         |
| 18 | `sub $14, $0, $1`     | $14 = -5                                 |
| 19 | `beq $0, $0, -1`      | branches to itself: the program's halt   |

The data file sets mem[0..3] to 5, 7, 0xFFFFFFFD and 0x80000000. To run your
own program, write the instruction words as hex, one per line, and point
`IMEM_INIT` at the file. Encode a 16-bit MIPS immediate as usual. Only its
low 8 bits matter, and they are sign-extended. A branch offset counts words
from the instruction after the branch.

## Where this build goes beyond, or differs from, the specification it follows

The specification leaves several points open. This build fills them in as
follows:

* **Datapath width:** the specification leaves it open. The default is 32 x
  32, and 16 x 16 is available by parameter.
* **Register 0:** it is hard-wired to zero, following MIPS.
* **Don't-care controls and unknown encodings:** don't-care outputs are
  driven 0. Unlisted opcodes act as no-ops. An unlisted R-format funct
  performs add.
* **ALU operation meanings:** the ALU control table gives only codes. The
  ALU implements the standard MIPS meaning of each: 000 AND, 001 OR,
  010 add, 110 subtract, 111 signed set-on-less-than. The ALU has no
  overflow detection.
* **Memory timing:** both memories read asynchronously, so the whole
  instruction fits in one cycle. A registered-address FPGA block RAM would
  need its address one edge early. That variant is not modelled.
* **Memory gating:** `MemRead` gates the data-memory read port.
* **Reset:** reset is synchronous and active high. It clears the PC and the
  registers, and it blocks data-memory writes while it is held.
* **Branch decision:** the branch decision `Branch AND Zero` is drawn in the
  reference diagram but not described in words. It follows from the meaning
  of `beq`.
* **PC structure:** the specification suggests merging the PC, its adder
  and the branch mux into an up-counter with a load input, as an option.
  This build keeps them as separate units.
* **Initialization files:** they are plain `$readmemh` hex files rather than
  vendor memory-initialization files.

The reference diagram shows byte addressing (`+4`, shift-left-2, 16-bit
immediate). The specification's text overrides that with word addressing and
an 8-bit immediate, and this build follows the text.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/mips_pkg.sv` | `mips_pkg` | opcodes, ALU op and ALUOp enums, control struct |
| `rtl/single_cycle_datapath.sv` | `single_cycle_datapath` | top: wires the units, branch decision, control assertions |
| `rtl/control_unit.sv` | `control_unit` | main control decode |
| `rtl/alu_control.sv` | `alu_control` | ALUOp + funct → ALU operation |
| `rtl/alu.sv` | `alu` | AND/OR/add/sub/slt, Zero flag |
| `rtl/reg_file.sv` | `reg_file` | 2-read/1-write register file |
| `rtl/program_counter.sv` | `program_counter` | PC register |
| `rtl/adder.sv` | `adder` | PC+1 and branch-target adders |
| `rtl/sign_extend.sv` | `sign_extend` | 8-bit immediate to datapath width |
| `rtl/mux2.sv` | `mux2` | the four 2-input multiplexers |
| `rtl/instr_mem.sv` | `instr_mem` | 256 x 32 instruction ROM |
| `rtl/data_mem.sv` | `data_mem` | 256-word data RAM |
| `rtl/demo_prog.hex`, `rtl/demo_data.hex` | | default memory contents (program above) |

The top's ports other than `clk`/`rst` are for observation only. They show
the PC, the instruction, the ALU result, the register write
(`reg_write`/`write_reg`/`write_data`), the memory write
(`mem_write`/`mem_addr`/`mem_wdata`) and `branch_taken` for the instruction
executing in the current cycle.

## Simulating

Run the commands from the repository root, so that the default hex paths
resolve. For example, for the full program run:

```
verilator --binary --timing --assert -Irtl rtl/mips_pkg.sv rtl/*.sv \
    tb/tb_single_cycle_datapath.sv --top-module tb_single_cycle_datapath -Mdir obj
./obj/Vtb_single_cycle_datapath
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. For the
random-program tests, add `tb/random_program_check.sv` to the file list.

## Verification

* **`tb_single_cycle_datapath`:** runs the demonstration program at the
  default parameters. It checks the design cycle by cycle against an
  instruction-set model inside the testbench. The model reads the same hex
  files and decodes each instruction on its own. The checks cover PC, the
  register write, the memory write and the branch decision, and one
  instruction must retire per cycle. At the end it compares all registers and
  all of data memory, plus hand-computed results. It fails if any mechanism
  never occurs: each ALU op, lw, sw, beq taken and not taken, a negative
  offset, a backward branch, and a write to $0.
* **`tb_random_programs` and `tb_random_programs_16x16`:** run three seeds
  each of random 256-word programs. A fresh program is loaded every 64
  cycles, for 3000 cycles. The programs include unlisted opcodes and
  functs, and all are checked against the same kind of model. One runs the
  32 x 32 configuration and the other the 16 x 16 one.
* **Unit tests:**
  * Exhaustive: control (64 opcodes), ALU control (256 input combinations),
    sign extension (256 values) and the 8-bit adder (65536 sums).
  * Random against a model: ALU, register file, data memory, PC and mux.
  * The instruction ROM is compared with words assembled independently from
    their fields.
