# G-CPU: an 8-bit teaching processor in SystemVerilog

The G-CPU is a small accumulator machine built around one shared 8-bit data
bus and a 16-bit address bus. Two accumulators, A and B, sit inside the ALU.
Four 16-bit address sources, PC, MAR, X and Y, feed an address multiplexer. A
6-bit instruction register drives a state-machine controller that issues one
set of control lines per clock. Every instruction is a short sequence of
single-cycle register transfers over the data bus. The point of the machine is
that each of these transfers can be seen: you can follow any instruction
through the block diagram one state at a time.

This RTL implements the whole processor, with a behavioural memory for
simulation. The datapath structure, the control lines, the fetch/decode
sequence and the per-addressing-mode execute sequences follow the published
G-CPU description. Where that description is silent, this implementation
makes its own choices, and these are listed in
[Own choices and departures](#own-choices-and-departures). The largest are the
full opcode map, the MSA/MSB codes and the list of 16 ALU functions.

## Datapath

```
             8-bit data bus (memory drives it in read cycles, MUXC in write cycles)
   +--------+------------+---------+---------+---------+---------+
   |        |            |         |         |         |         |
 IR5:0    MUXA  MUXB    PC(H/L)  MAR(H/L)  X block   Y block
   |        |    |        |         |      (X+Xdisp) (Y+Ydisp)
   v        A    B        +----+----+----+----+
Controller   \  /              | 0  | 1  | 2  | 3
   |        MUXC (16 fns)     Address bus mux --> A15:0
   |          |                    ^
   |          +--> tri-state --> data bus (when R/-W = 0)
   +--> control lines ------------+ ADDR_SEL1:0
```

* **Instruction register** (`gcpu_ir`): 6 bits, loaded from data bus bits
  5:0 on a rising edge when `IR_LD` is high. Only the FETCH state raises
  `IR_LD`.
* **ALU** (`gcpu_alu`): registers A and B. MUXA picks A's next value and
  MUXB picks B's (hold, data bus, the other accumulator, or the MUXC
  result). MUXC computes one of 16 functions of A and B. The flags come
  straight from register A, combinationally: `Z = (A == 0)` and
  `N = A[7]`. An ALU operation therefore takes one clock, and a branch
  sees the flags of the value now in A.
* **Address registers** (`gcpu_addr_reg`): the data bus is 8 bits wide,
  so every 16-bit source is split into an upper and a lower byte. Each
  byte has its own load strobe, and the whole register has an increment
  strobe. PC and MAR are plain instances.
* **Index register blocks** (`gcpu_index_block`): X or Y, plus an 8-bit
  displacement register (`XD_LD` / `YD_LD`). A block's output to the
  address mux is always index + displacement.
* **Address bus mux** (`gcpu_addr_mux`): `ADDR_SEL` 0 = PC, 1 = MAR,
  2 = X block, 3 = Y block.
* **Address control unit** (`gcpu_acu`): groups PC, MAR, the X and Y
  blocks and the address mux.
* **Controller** (`gcpu_controller`): see the next section.
* **Top** (`gcpu`): wires the blocks together and models the shared bus.

### The shared data bus

On the original machine the data bus is bidirectional, and the ALU output
reaches it through a tri-state buffer that `R/-W` enables. This core has no
internal tri-state nets. Instead it exposes three signals:

| port       | meaning                                                     |
|------------|-------------------------------------------------------------|
| `data_in`  | the value memory drives onto the bus                        |
| `data_out` | the MUXC output                                             |
| `data_oe`  | `!rw`: the CPU drives the bus in this cycle                 |

Inside the core the bus is `rw ? data_in : data_out`. To rebuild a real
shared bus, put a tri-state pad driven by `data_oe` outside the core.

Memory timing expected by the core:

* **Read**: memory returns `mem[addr]` within the same cycle
  (combinational or asynchronous read).
* **Write**: memory stores `data_out` on the rising edge that ends a cycle
  with `rw = 0`.

## How instructions execute

This section is the heart of the design. The controller is an ASM chart
built as a step counter (FETCH, DECODE, E1 to E4). The current opcode
decides what each step does. All outputs are combinational from the state,
the IR and, for branches, the flags, so branches make a Mealy decision. Any
control line a state does not mention keeps its default:

* read cycle (`R/-W = 1`);
* PC on the address bus (`ADDR_SEL = 00`);
* A and B held (MSA and MSB = 00).

| step   | what happens                                                   |
|--------|----------------------------------------------------------------|
| FETCH  | `M[PC] => IR` (`IR_LD`)                                         |
| DECODE | `INC_PC`; inherent instructions complete here                   |
| E1..E4 | the extra execute states of the addressing mode (below)         |

Because PC is only incremented in DECODE, PC points at the first operand
byte when E1 starts. Every operand-fetch state then increments PC again.

| mode | example | extra states | cycles | sequence after DECODE |
|------|---------|--------------|--------|-----------------------|
| inherent | `SUM_BA`, `TAB`, `INX` | 0 | 2 | (executed in DECODE) |
| immediate, 8-bit | `LDAA #$37` | 1 | 3 | `M[PC] => A`, INC_PC |
| immediate, 16-bit | `LDX #$1370` | 2 | 4 | `M[PC] => XL`, INC_PC; `M[PC] => XH`, INC_PC |
| extended | `LDAA $1000`, `STAB $2000` | 3 | 5 | `M[PC] => MARL`, INC_PC; `M[PC] => MARH`, INC_PC; `M[MAR] <=> A/B` |
| extended, 16-bit | `LDX $1000` | 4 | 6 | as extended, then `M[MAR] => XL`, MAR_INC; `M[MAR] => XH` |
| indexed | `LDAA 0,X`, `STAB 3,Y` | 2 | 4 | `M[PC] => Xdisp`, INC_PC; `M[X+dd] <=> A/B` |
| absolute (branch) | `BEQ $08`, `BP LOOP` | 1 | 3 | if condition: `M[PC] => PC_L`, else INC_PC |

Points to note:

* **Multi-byte operands are little-endian.** Both 16-bit addresses and
  16-bit data put the low byte first. `LDX #$1370` assembles to
  `08 70 13`.
* **A branch only replaces PC_L.** PC_H stays as it was when the operand
  byte was read, so a branch target is always in the 256-byte page of the
  branch operand. There is no jump that reaches another page.
* **A store reuses the ALU output path.** The controller selects
  `MUXC = pass A` (or pass B) and drives `R/-W` low, so the ALU output
  reaches memory through the bus driver. Only A and B can be stored.
* **Index registers change outside indexed loads and stores.** `LDX`/`LDY`
  (immediate or extended) load them, and `INX`/`INY` step them. The
  displacement register keeps its last value. It has no effect until the
  next indexed instruction reloads it.
* **Unused opcodes are 2-cycle no-operations.**

Assertions in the controller check two rules: `IR_LD` happens only in FETCH,
and only in a read cycle with PC on the address bus.

## Instruction set

Opcodes are 6 bits (64 possible). Operands follow the opcode:

* `mm`: an 8-bit immediate value.
* `ll hh`: a 16-bit address, low byte first.
* `ii jj`: 16-bit immediate data, low byte first.
* `dd`: an unsigned displacement.
* `bb`: a branch target's low byte.

The "Fixed by the G-CPU description" column marks encodings taken from the
published ASM charts and examples. The rest are this implementation's.

| opcode | instruction | bytes | cycles | operation | Fixed by the G-CPU description |
|--------|-------------|-------|--------|-----------|------|
| 00 | TAB | 1 | 2 | A => B | yes |
| 01 | TBA | 1 | 2 | B => A | yes |
| 02 | LDAA #mm | 2 | 3 | mm => A | yes |
| 03 | LDAB #mm | 2 | 3 | mm => B | yes |
| 04 | LDAA hhll | 3 | 5 | M[hhll] => A | yes |
| 05 | LDAB hhll | 3 | 5 | M[hhll] => B | |
| 06 | STAA hhll | 3 | 5 | A => M[hhll] | |
| 07 | STAB hhll | 3 | 5 | B => M[hhll] | |
| 08 | LDX #jjii | 3 | 4 | jjii => X | yes |
| 09 | LDY #jjii | 3 | 4 | jjii => Y | |
| 0A | LDX hhll | 3 | 6 | M[hhll+1]:M[hhll] => X | |
| 0B | LDY hhll | 3 | 6 | M[hhll+1]:M[hhll] => Y | |
| 0C | LDAA dd,X | 2 | 4 | M[X+dd] => A | yes |
| 0D | LDAA dd,Y | 2 | 4 | M[Y+dd] => A | yes |
| 0E / 0F | LDAB dd,X / dd,Y | 2 | 4 | M[X/Y+dd] => B | |
| 10 / 11 | STAA dd,X / dd,Y | 2 | 4 | A => M[X/Y+dd] | |
| 12 / 13 | STAB dd,X / dd,Y | 2 | 4 | B => M[X/Y+dd] | |
| 14 / 15 | INX / INY | 1 | 2 | X+1 => X / Y+1 => Y | |
| 18 | BEQ bb | 2 | 3 | if Z: bb => PC_L | |
| 19 | BP bb | 2 | 3 | if not N: bb => PC_L | |
| 20+f | ALU op f (f = 2..15) | 1 | 2 | MUXC(f) => A | |

ALU functions (`MSC3:0`, see `gcpu_pkg::alu_fn_e`). Functions 0 and 1 are
used by the stores and have no instruction of their own.

| f | name | result |
|---|------|--------|
| 0 | pass A | A |
| 1 | pass B | B |
| 2 | SUM_BA | A + B |
| 3 | SUB_AB | A - B |
| 4 | AND_BA | A & B |
| 5 | OR_BA | A \| B |
| 6 | XOR_BA | A ^ B |
| 7 | COMP_A | ~A |
| 8 | NEG_A | -A |
| 9 | SHFA_L | A << 1 |
| 10 | SHFA_R | A >> 1, logical |
| 11 | ASHFA_R | A >> 1, arithmetic |
| 12 | ROTA_L | rotate A left |
| 13 | ROTA_R | rotate A right |
| 14 | INC_A | A + 1 |
| 15 | DEC_A | A - 1 |

Only SUM_BA and SHFA_L are named in the G-CPU description. The 16-function
width comes from it too. The other fourteen functions are one reasonable
filling of that space.

## Own choices and departures

These points are not given by the G-CPU description. They are decisions made
in this RTL, so change them to match your course's encoding if needed.

* **Opcode map.** The opcodes in the instruction table not marked as fixed
  by the G-CPU description are this design's own. INX and INY exist because
  the datapath has `X_INC` and `Y_INC` lines.
* **BP condition.** BP branches when N is clear (A >= 0). It may have been
  meant as "A > 0".
* **MSA/MSB codes.** 00 hold, 01 data bus, 10 the other accumulator,
  11 MUXC result. Hold is code 00 because the idle value must protect A
  and B.
* **ALU function list.** See the table above.
* **16-bit extended loads.** `LDX hhll` and `LDY hhll` read the low byte,
  pulse `MAR_INC`, then read the high byte.
* **Displacement.** The displacement is unsigned.
* **State encoding.** The original charts label states with six-bit
  numbers. Here the state is a 3-bit step number, and the opcode in IR
  decides the step's meaning.
* **Reset.** The reset is synchronous and active high. It clears A, B, PC,
  MAR, X, Y, both displacements and the IR, and puts the controller in
  FETCH. While reset is held, the controller outputs the idle read-cycle
  control word, so memory is never written during reset. Execution
  therefore starts at $0000.
* **Data bus.** The tri-state data bus is split into
  `data_in`/`data_out`/`data_oe`, as described above.
* **Observation ports.** The top level adds outputs for the registers and
  the controller state. They exist for testing and do not change the
  design.
* **Not included.** Memory is not part of the CPU. Its ROM/RAM layout is
  up to the system. `tb/gcpu_mem_model.sv` is a 64 KiB behavioural model
  used only for simulation.

## Verification

Every block has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_gcpu_ir` | loads only on `ir_ld`, reset value |
| `tb_gcpu_alu` | 4000 random cycles of MSA/MSB/MSC against an integer reference; flags; all 16 functions seen |
| `tb_gcpu_addr_reg` | random U/L loads and increments, including the carry from the low into the high byte |
| `tb_gcpu_index_block` | index register and index + displacement |
| `tb_gcpu_addr_mux` | the 0..3 source numbering |
| `tb_gcpu_acu` | all four sources with random strobes and selects |
| `tb_gcpu_controller` | all 64 opcodes under all flag values (see below) |
| `tb_gcpu_addressing_modes` | effective address on the bus and cycle count for one example instruction of each addressing mode; branch taken and not taken |
| `tb_gcpu` | the whole CPU with memory (see below) |

For each opcode, `tb_gcpu_controller` checks:

* the cycle count;
* the number of PC increments;
* the PC_L load on a taken branch;
* which register is loaded or stored, and from which address source;
* MAR, X, Y and displacement activity.

`tb_gcpu` runs the whole CPU with the behavioural memory, at its default
configuration. An instruction-level reference model runs in lock step.
At every FETCH the testbench compares A, B, X, Y, PC and the cycles taken
by the previous instruction, and at the end it compares all 64 KiB of
memory. It runs two kinds of program:

* **A directed program.** It sums the table `1,2,3,4,5,6` stored at $1FF0,
  using an indexed load in a loop closed by `BEQ`/`BP`. Then it exercises
  `LDX #$1370`, `LDAA #$37`, `LDX $1000`, `STAB 3,Y` and an indexed store
  and reload. It halts in `BEQ` to itself. The results are also checked
  against hand-computed values.
* **Four random instruction streams**, 3000 instructions each.

The testbench counts every mechanism and fails if one never occurs:

* each addressing mode;
* taken and untaken branches;
* write cycles;
* `MAR_INC`;
* a PC increment that carries into PC_H;
* each ALU function.

### Running with Verilator

All sources are in `rtl/` (design) and `tb/` (testbenches and the memory
model). Put the package first:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_gcpu \
    rtl/gcpu_pkg.sv tb/tb_gcpu.sv
./obj_dir/Vtb_gcpu
```

Replace `tb_gcpu` with any other testbench name to run that block alone.
To lint the design, use
`verilator --lint-only -Wall -Irtl rtl/gcpu_pkg.sv rtl/gcpu.sv`. The whole
end-to-end test finishes in well under a second.

### Changing the design

* **Opcodes, ALU codes and the control word** are all in
  `rtl/gcpu_pkg.sv`. The controller decodes opcode classes by range
  (`is_ext8`, `is_idx`, ...). If you move opcodes, update those
  expressions in `gcpu_controller.sv`, the reference model in
  `tb/tb_gcpu.sv`, and the expectations in `tb/tb_gcpu_controller.sv`.
* **A new instruction** usually needs three things: an opcode constant,
  one more class test, and its rows in the E1..E4 cases of the controller.
  The datapath already has every control line of the original machine.
