# VecLIW: VLIW and short-vector instructions on one four-lane datapath

VecLIW is a 32-bit processor that gets parallelism from two sources and runs
both on the same hardware. Irregular code is compiled into VLIW words: each
128-bit instruction packs four independent scalar operations, and all four
execute in the same cycle on four integer units. Regular, data-parallel code
uses vector instructions: one instruction names up to eight element
operations, and the processor feeds them to the same four units, four
elements per cycle. Vector code gets no dedicated vector unit, and scalar
code sees no idle vector unit.

This RTL is a five-stage in-order pipeline (fetch, decode/register read,
execute, memory, write back). It has a unified 64 x 32-bit register file that
is read as scalars or as 8-element vectors, a data memory that moves
128 bits per cycle, and a forward unit between the four lanes.

## The instruction word

A VLIW instruction is 128 bits. Slot 1 is bits [31:0] and slot 4 is bits
[127:96]. Each slot holds a 32-bit MIPS-like instruction:

```
R: opcode[31:26]  RS[25:20]  RT[19:14]  RD[13:8]  function[7:0]
I: opcode[31:26]  RS[25:20]  RT[19:14]  imm[13:0]
J: opcode[31:26]  address[25:0]
```

The top two opcode bits form the **SV field**. It says which operands are
vectors:

| SV | suffix | RS     | RT     | result |
|----|--------|--------|--------|--------|
| 00 | `.ss`  | scalar | scalar | scalar |
| 01 | `.sv`  | scalar | vector | vector |
| 10 | `.vs`  | vector | scalar | vector |
| 11 | `.vv`  | vector | vector | vector |

For example, `sub.sv` computes `s - v[i]` for every element.

Slot rules:

- Only slot 1 may hold a vector, a load/store or a control instruction.
  Slots 2-4 hold scalar ALU operations.
- When slot 1 is a vector, slots 2-4 are not executed, because the vector
  uses all four units. When slot 1 is a control instruction, slots 2-4 are
  not executed either.
- A load/store in slot 1 may run beside three scalar ALU operations.
- An instruction that a slot may not hold is treated as a NOP.

The 4-bit operation codes are this design's own. The source describes the
formats but gives no opcode table. The codes are in `rtl/vecliw_pkg.sv`:

| op  | name  | meaning |
|-----|-------|---------|
| 0   | NOP   | no operation (an all-zero word is a NOP) |
| 1   | R-ALU | `rd = rs OP rt`. OP is `function[3:0]`: add, sub, and, or, xor, nor, slt, sltu, sll, srl, sra, mul (0-11) |
| 2-6 | ADDI, ANDI, ORI, XORI, SLTI | `rt = rs OP ext(imm)`. ADDI and SLTI sign-extend; the logic ops zero-extend |
| 8   | LW    | `rt = mem[rs + sext(imm)]`; with SV[0] set, a vector load into RT |
| 9   | SW    | `mem[rs + sext(imm)] = rt`; with SV[0] set, a vector store of RT |
| A/B | BEQZ/BNEZ | if `rs ==/!= 0`: `pc = npc + sext(imm)*16` |
| C   | J     | `pc = {npc[31:30], address, 4'b0000}` |
| D   | SETVL | vector length register `VLR = imm`, clamped to 1..8 |

## Registers: 8 banks x 8 elements, addressed by {Si, Bn}

The 64 registers sit in eight banks, B0..B7, of eight 32-bit elements each.
Each 6-bit register field is `{Si[2:0], Bn[2:0]}`: a bank number and a start
element. The same field means two things:

- **As a scalar**, it names one register: element `Si` of bank `Bn`.
- **As a vector**, it names a vector that starts at element `Si` of bank
  `Bn`. Element `i` is element `(Si + i) mod 8` of the same bank, so a
  vector may start anywhere and wraps round inside its bank.

Internally a register's physical index is `{Bn, element}`. The `phys_reg`
function in `vecliw_pkg` converts a field to that index.

The file has eight combinational read ports (RS and RT for each lane) and
four write ports. A register written in the same cycle is read as the new
value. When two ports write one register, the higher slot wins. All
registers clear on reset.

## How a vector instruction is issued

This is the part that differs most from a plain five-stage pipeline.
`vecliw_vec_seq` holds the vector length register (VLR, reset to 8) and four
counters: RS, RT and RD start indices, and the immediate.

1. A vector instruction arrives in IF/ID. In the first cycle the counters
   take their values straight from the instruction: `Si` of RS, RT and RD,
   and the extended immediate of slot 1.
2. Lane `k` (0..3) works on element `k` of the current group. Its vector
   operands are read from `{Bn, cur_Si + k}`, and its result goes to
   `{Bn_dst, cur_Si_dst + k}`. A scalar operand of a `.sv`/`.vs`
   instruction is read from its fixed register by all lanes.
3. A lane whose element number is `VLR` or more is disabled. It writes no
   register and moves no memory word.
4. If elements remain, the sequencer raises `stall`, and the PC and IF/ID
   hold. In the next cycle the start indices are 4 higher (mod 8). For a
   load or store the immediate is 16 higher, which is four words on.
5. A vector of length `v` therefore takes `ceil(v/4)` decode cycles: one
   for v <= 4 and two for v = 5..8. After its last group, the next VLIW
   enters decode.

The groups are separate issues. Group 2 of a vector reaches execute one
cycle after group 1, so the forward unit hands it any group-1 results it
reads. A vector whose source and destination overlap therefore behaves as
if executed four elements at a time, in order.

Vector memory accesses compute `address = RS + imm + 16*group`. Lane `k`
moves word `address/4 + k`. Element `i` of a vector load or store is at byte
`RS + imm + 4*i`.

## Pipeline, forwarding and the scheduling rules

| stage | what happens |
|-------|--------------|
| IF  | PC reads the instruction memory. NPC = PC + 16. |
| ID  | Decode the four slots, sequence vectors, read 8 operands, extend 4 immediates, resolve BEQZ/BNEZ/J. |
| EX  | Four ALUs. Operands pass through the forward unit. Lane 1 forms the load/store address. |
| MEM | Data memory reads or writes up to four consecutive words (128 bits). |
| WB  | Up to four results, each from the ALU or from memory, written back. |

The forward unit compares all eight execute-stage sources with the four
destinations in EX/MEM and the four in MEM/WB. The newest wins: EX/MEM first,
and within one stage the highest lane. Store data is forwarded as well.

There are **no interlocks**, as in a classic VLIW. The compiler, or whoever
writes the program, must keep these distances:

- **Load to use:** at least one VLIW between a load and an instruction that
  reads its result. A NOP VLIW will do. The last group of a vector load
  counts as the load.
- **Register to branch:** at least two VLIWs between writing the register
  that a BEQZ/BNEZ tests and the branch itself. The branch reads the
  register file in decode, with no forwarding.
- **Taken branch or jump:** costs one bubble. The instruction fetched behind
  it is squashed, so there is no delay slot.

ALU-to-ALU dependences need no spacing at all, whether scalar or vector.

## Memories

- **Instruction memory** (`vecliw_icache`): 256 x 128 bits by default. Read
  combinationally by PC[11:4]. A write port loads programs.
- **Data memory** (`vecliw_dcache`): 1024 words by default, in four
  word-interleaved banks. The four words of any word-aligned access fall in
  four different banks, so a 128-bit access need not be 16-byte aligned.
  Per-word enables let scalar stores and short vectors write fewer than four
  words. A scalar load or store uses word 0.
- Neither memory models misses. Both always hit.

## Top-level interface (`vecliw_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `imem_we`, `imem_addr`, `imem_wdata[127:0]` | in | write a VLIW (byte address) |
| `dmem_ext_we`, `dmem_ext_addr`, `dmem_ext_wdata`, `dmem_ext_rdata` | in/out | load or inspect a data word (word address); a write wins over a pipeline store in the same cycle |
| `pc` | out | fetch address |
| `stall` | out | decode is issuing a further group of a vector |
| `vlr` | out | vector length register |
| `wb_en[3:0]`, `wb_addr[3:0]`, `wb_data[3:0]` | out | the four write-back ports, each cycle |

Parameters: `IMEM_DEPTH` (256), `DMEM_WORDS` (1024) and `MVL_P` (8). The
lane count (4), the register count (64) and the 14-bit immediate are fixed by
the instruction format.

To run a program:

1. Hold `rst_n` low.
2. Write the program through `imem_*` and the data through `dmem_ext_*`.
3. Release `rst_n`. Execution starts at address 0.

A program can end in a `J` to itself.

## Files

| file | block |
|------|-------|
| `rtl/vecliw_pkg.sv` | encodings, pipeline-register structs, `phys_reg` |
| `rtl/vecliw_fetch.sv` | PC, +16 adder, next-PC mux |
| `rtl/vecliw_icache.sv` | instruction memory |
| `rtl/vecliw_pipe_reg.sv` | pipeline register with hold and flush (IF/ID, ID/EX, EX/MEM, MEM/WB) |
| `rtl/vecliw_control.sv` | decoder of the four slots |
| `rtl/vecliw_vec_seq.sv` | VLR, RS/RT/RD/immediate counters, vector issue and stall |
| `rtl/vecliw_ext.sv` | four 14-to-32-bit signed/unsigned extenders |
| `rtl/vecliw_regfile.sv` | 64 x 32 unified register file, 8R/4W |
| `rtl/vecliw_branch.sv` | branch target adder, zero test, jump target |
| `rtl/vecliw_alu.sv` | one execution unit (four are used) |
| `rtl/vecliw_forward.sv` | forward unit |
| `rtl/vecliw_dcache.sv` | 128-bit data memory |
| `rtl/vecliw_top.sv` | the pipeline |

Every module has a self-checking testbench, `tb/tb_<module>.sv`.
`tb/vecliw_asm_pkg.sv` holds small instruction encoders.

`tb/tb_vecliw_top.sv` runs the whole processor at its default sizes. It
assembles programs of about 250 VLIWs. It runs four such programs in turn,
with a reset between them, on the processor and on an instruction-level
model, and checks three things:

- all 64 registers and all 1024 data words against the model;
- the total cycle count: one per VLIW, `ceil(VLR/4) - 1` extra per vector,
  and one per taken branch or jump;
- that each of these happened: vector stalls, partial vectors, start-index
  wrap-round, forwarding from each stage, taken and untaken branches, jumps,
  scalar and vector loads and stores, and SETVL.

The program has two parts:

- a fixed part: a counted loop, wrapping vectors and immediate-extension
  cases;
- a random part: four-wide scalar VLIWs, vector ALU operations of random
  length and type, and loads and stores. The random part and the initial data differ
  from program to program.

## Simulating

With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/vecliw_pkg.sv tb/vecliw_asm_pkg.sv rtl/*.sv tb/tb_vecliw_top.sv \
  --top-module tb_vecliw_top
./obj_dir/Vtb_vecliw_top
```

A unit test needs only the package, its module and its testbench (plus
`tb/vecliw_asm_pkg.sv` for `tb_vecliw_control`). Each testbench ends with
`TB_RESULT checks=N failures=M`. Each has a cycle watchdog that fails the run
if it hangs.

## What is specified and what was chosen

The following come from the description of the architecture:

- four-slot 128-bit VLIW words;
- the R/I/J field layout and the SV field;
- the restriction of vectors, memory and control operations to slot 1;
- the 64-entry register file in 8 banks of 8, with {Si, Bn} addressing and
  wrapping vectors;
- 8 reads and 4 writes per cycle;
- MVL = 8;
- the counters that step by 4 (and the immediate by 16) while fetch is
  stalled, and `ceil(v/4)` issue cycles;
- address generation in lane 1;
- one 128-bit memory access per cycle;
- four write-back results selected between ALU and memory;
- the forward unit's position;
- branch-target adder and zero test in decode.

These are this design's own choices:

- the opcode and function numbering, and the instruction subset;
- the ALU operation list;
- SETVL as the way to write VLR;
- BEQZ/BNEZ/J semantics, and the 16-byte scaling of branch offsets;
- the immediate stepping only for loads and stores (an ALU-immediate vector
  keeps its constant);
- the memory sizes, banking and always-hit behaviour, and the external
  memory ports;
- reset values;
- register-file write-through and write priority;
- the lack of hazard interlocks, and so the scheduling rules above.

The internal ALU operation code is 4 bits, not 3, because twelve operations
are implemented.

Not modelled: caches with misses and refill, any host interface beyond the
load ports, and the wider instruction set that the source mentions only as a
superset of this subset.
