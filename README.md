# An 8-bit soft processor with a 22-operation ALU

This is a small accumulator-style processor for an FPGA. It fetches bytes from
a 1024 x 8 memory, loads two 8-bit operands into its `a` and `b` registers and
applies one of 22 arithmetic or logic operations to them. The ALU is the core of
the design. An arithmetic unit and a logic unit compute every operation at once,
and a 32:1 multiplexer, driven by a 5-bit selection code, picks the result. The
result goes to a 15-bit `y` register, its low byte to an 8-bit accumulator, and
two flags record whether it was zero and what its bit 7 was.

The processor has no branches, no stores and no general register file. It runs
through a program of ALU instructions in memory order and stops at HALT. It
suits teaching, or a small calculating engine fed from a host that loads its
memory.

## Block structure

```
             ext_* (load / inspect port)
                     |
   +----------+   +--v-------------+  db (8)   +----+
   | program  |-->| memory 1024x8  |---------->| IR |--- IR[4:0] sel ---+
   | counter  |   | port A: read   |     |     +----+                   |
   +----------+   +----------------+     |        | IR[7:5]             |
        ^ pc_inc        ^ cs, memrd      +--> a <-+-- acc               v
        |               |                +--> b          +--------------------+
   +----+---------------+---+                            | arith_unit  logic_ |
   |      control_unit      |--- load enables ---------->|      \       unit  |
   +------------------------+                            |     32:1 alu_mux   |
                                                         +--------------------+
                                                            | y    | y[7:0] | zero, sign
                                                            v      v        v
                                                          y(15)   acc(8)   flags(2)
```

| Module | Role |
|---|---|
| `soft_processor` | Top level. Wires the blocks below together. |
| `control_unit` | State machine that generates every control signal. |
| `alu` | Arithmetic unit + logic unit + 32:1 multiplexer + zero/sign flags. |
| `arith_unit` | Add, subtract, increment, decrement, multiply, square, compare, add/subtract with carry. |
| `logic_unit` | XOR, XNOR, AND, NAND, NOR, OR, NOT, shifts and rotates of `a`. |
| `alu_mux` | 32:1 multiplexer with selection lines s4..s0. |
| `memory` | 1024 x 8 memory with chip select. Dual port with synchronous reads. |
| `program_counter` | 10-bit incrementing address counter. |
| `load_reg` | Register with a load enable. Used for IR, accumulator, `a`, `b`, `y` and the flags. |
| `sp_pkg` | Widths, operation codes, instruction classes, states and the control-signal struct. |

## The operations

The selection code is `IR[4:0]`. Codes 10110 to 11111 are unused.

| Code | Operation | Result `y` |
|---|---|---|
| 00000 | add | a + b (9 bits, carry in bit 8) |
| 00001 | subtract | a − b (9 bits; bit 8 set on borrow) |
| 00010 | increment | a + 1 (9 bits) |
| 00011 | decrement | a − 1 (9 bits) |
| 00100 | multiply | a × b, low 15 bits |
| 00101 | square | a × a, low 15 bits |
| 00110 | XOR | a ^ b |
| 00111 | XNOR | ~(a ^ b) |
| 01000 | AND | a & b |
| 01001 | NAND | ~(a & b) |
| 01010 | NOR | ~(a \| b) |
| 01011 | OR | a \| b |
| 01100 | NOT | ~a |
| 01101 | arithmetic shift left | {a[7], a[5:0], 0}: the sign bit stays put |
| 01110 | arithmetic shift right | {a[7], a[7:1]} |
| 01111 | rotate left | {a[6:0], a[7]} |
| 10000 | rotate right | {a[0], a[7:1]} |
| 10001 | compare | {a>b, a==b, a<b} in bits 2..0, unsigned |
| 10010 | logical shift left | {a[6:0], 0} |
| 10011 | logical shift right | {0, a[7:1]} |
| 10100 | add with carry | a + b + 1 (9 bits) |
| 10101 | subtract with carry | a − b + 1 (9 bits) |

All results are zero-extended to 15 bits.

The "with carry" operations always use a carry-in of 1. No carry flag is kept
between instructions.

Flags:
- **zero** is set when all 15 bits of `y` are zero.
- **sign** is a copy of bit 7 of `y`.

Where the table says "shift", the shift is by one position. The operation set is
the one the processor is specified with. These details are choices made for this
design, because the specification only names the operations:
- the result widths;
- the compare encoding;
- the form of the arithmetic left shift, chosen so that it differs from the
  logical left shift.

### Why `y` is 15 bits

The product of two bytes needs 16 bits, but `y` is 15 bits wide, following the
reference waveform's `y[14:0]`. So 255 × 255 = FE01H appears as 7E01H. To keep
the full product, instantiate the top with `Y_W = 16`. Everything is
parameterized on `Y_W`, and the testbench model takes the width as an argument.

## Instructions and their timing

The instruction format and the HALT are this design's own choices. The
specification describes only the fetch steps and a decode "according to the
binary pattern of the instruction".

| IR[7:5] | Instruction | Bytes in memory | Clocks |
|---|---|---|---|
| 000 | ALU op, `a` and `b` from memory | opcode, a, b | 8 |
| 001 | ALU op, `a` from the accumulator | opcode, b | 6 |
| 111 | HALT: stop until reset | opcode | n/a |
| other, or IR[4:0] > 10101 | no-operation | opcode | 3 |

With the accumulator form, operations can be chained. For example:

```
00 05 07   add 5,7        -> y = 00CH, acc = 0CH
24 03      mul acc,3      -> y = 024H
22 00      inc acc        -> y = 025H   (b is fetched but unused)
E0         halt
```

Unary operations still fetch a `b` byte, which keeps the sequence regular.

### Control-unit states

| State | Action |
|---|---|
| `S_FETCH` | Drives `memrd` and chip select with the PC on the address bus. PC+1. |
| `S_LOAD_IR` | IR takes the data bus. |
| `S_DECODE` | Picks the next state from IR. In accumulator form, `a` loads from the accumulator here. |
| `S_READ_A` / `S_LOAD_A` | Reads the `a` operand byte, then loads it. |
| `S_READ_B` / `S_LOAD_B` | Reads the `b` operand byte, then loads it. |
| `S_EXECUTE` | `y`, accumulator and flags load the ALU output. `instr_done` pulses. |
| `S_HALT` | Absorbing state, left only by reset. |

Every memory access takes two states because the memory reads synchronously,
like an FPGA block RAM. The address is sampled at one edge and the data is valid
in the next cycle.

The ALU is purely combinational between the `a`/`b`/IR registers and the
`y`/accumulator/flag registers. The longest path is the 8 x 8 multiplier feeding
the 32:1 multiplexer.

## Memory and the external port

The memory has 1024 words of 8 bits at addresses 000H to 3FFH. It responds only
while its chip select is 1. It has two ports:

- **Port A** belongs to the processor: `cs` and `memrd` come from the control
  unit, the address from the PC, and the data goes onto the data bus `db`. The
  output holds its last value when no read takes place.
- **Port B** is the `ext_*` port of the top. Writing with `ext_cs=1, ext_we=1`
  stores a byte at the clock edge. Reading with `ext_cs=1, ext_we=0` returns the
  byte one cycle later on `ext_rdata`.

The usual way to run a program:
1. Hold `reset` high.
2. Write the program through port B.
3. Release `reset`.
4. Wait for `halted`.

The processor never writes memory. Port B may read while the processor runs.

The memory is cleared at time zero. Reset is synchronous and active high. It
clears the PC, IR, `a`, `b`, `y`, the accumulator and the flags.

## Top-level ports

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | Clock. Synchronous active-high reset. |
| `ext_cs`, `ext_we`, `ext_addr`, `ext_wdata` | in | 1, 1, 10, 8 | Memory port B. |
| `ext_rdata` | out | 8 | Port B read data. |
| `memrd`, `pc`, `db`, `ir` | out | 1, 10, 8, 8 | Fetch signals, visible for debug. |
| `a`, `b`, `y`, `acc` | out | 8, 8, 15, 8 | Datapath registers. |
| `zero`, `sign` | out | 1 | Flags of the last ALU instruction. |
| `halted`, `instr_done` | out | 1 | In HALT / an ALU instruction retires this cycle. |

Parameters: `DATA_W = 8`, `ADDR_W = 10` (memory depth is `2**ADDR_W`) and
`Y_W = 15`. The ALU's operation encodings assume 8-bit operands, so change only
`ADDR_W` and `Y_W`.

## Where this design departs from, or adds to, its specification

- **`y` width.** 15 bits, from the reference waveform. The prose calls `y` an
  8-bit register, which cannot hold a product.
- **Instruction encoding, operand fetch, HALT and the no-operation rule.** Own
  choices, as described above.
- **Accumulator.** The specification lists an 8-bit accumulator without saying
  how it is used. Here it receives the low byte of every result and can serve as
  operand `a`.
- **Operation codes.** The selection codes follow the operation table above,
  so instruction 01H is a subtraction.
- **Sign flag.** The prose around the sign flag says that D7 = 1 marks a
  *positive* number. The flag here simply copies D7, so that statement does not
  affect the logic.
- **Second memory port.** Added for program loading, as in a dual-port block
  RAM.
- **Not built.**
  - Jumps, stores and interrupts, which are not part of the specified processor.
  - The floating-point unit, which is only mentioned as future work.
  - The reported FPGA results (328 slices, 1 MHz). They belong to the original
    implementation and are not reproduced or claimed here.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_arith_unit`, `tb_logic_unit` | All 65,536 operand pairs against integer arithmetic. |
| `tb_alu` | All 32 selection codes with corner and random operands, plus the flags. Uses the reference model `tb/sp_ref_pkg.sv`. |
| `tb_alu_mux` | Every selection code. |
| `tb_memory` | Full write/read of all 1024 words, read latency, chip-select gating, both ports. |
| `tb_program_counter` | Wrap from 3FFH to 000H, reset. |
| `tb_load_reg` | Load, hold and reset at 8 and 15 bits. |
| `tb_control_unit` | The control word of every state for each instruction class, the cycle counts, HALT and leaving HALT by reset. |
| `tb_soft_processor` | End to end at the default sizes and a 1 MHz clock (details below). |
| `tb_ram_image` | End to end on the image RAM[i] = i mod 256 (details below). |

`tb_soft_processor` loads a program of 72 ALU instructions through port B. The
program covers:
- every operation, twice with operands from memory;
- every operation again in accumulator form;
- no-operations;
- HALT.

It checks `y`, the accumulator, the flags and the clock count of every
instruction against a model. It also counts that every mechanism occurred: each
operation, the accumulator operand, a no-operation, HALT, and both flags.

`tb_ram_image` fills memory with RAM[i] = i mod 256, the image used in the
reference addition example. The processor runs through it: the first
instruction is ADD 01H, 02H. An instruction-set model in the testbench predicts
every result and the final PC.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sp_pkg.sv tb/sp_ref_pkg.sv tb/tb_soft_processor.sv \
    --top-module tb_soft_processor -o sim
./obj_dir/sim
```

Replace the testbench file and the top-module name to run the others. Every
testbench finishes in well under a second.

`control_unit` asserts that `memrd` never appears without chip select. That
assertion is active when `--assert` is given.
