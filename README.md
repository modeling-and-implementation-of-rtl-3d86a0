# An Instruction List microprocessor for PLCs

A PLC program written in IEC 61131-3 Instruction List (IL) is normally compiled
for a general-purpose CPU, whose instruction set does not match IL. This
processor executes IL directly: every IL line is one 40-bit machine instruction.
There is an integer/REAL ALU for words and a contact/coil ALU for bits, and the
IL "current result" is kept in hardware. Every instruction, including
single-precision floating-point division, finishes in 4 to 11 clock cycles.

The RTL follows the architecture of the FPGA microprocessor described in
*Modeling and Implementation of a Specific Microprocessor to Enhance the
Performance of PLCs Employing FPGAs*. That work published the block diagram,
the instruction cycle, the instruction set, the memory sizes and the measured
cycle counts, but not every encoding or timing detail. Where the RTL had to
choose, this README says so, mainly in "Departures and choices" below.

Top module: `plc_microprocessor` (`rtl/plc_microprocessor.sv`).

## Block structure

```
             +-----------------+  8   +----------------+ 40 (IC)
  jump ----->| program_counter |----->| program_memory |-----+--------------------+
  target     +-----------------+      |   256 x 40     |     |                    |
               ^ INC_PC, WR_PC        +----------------+     v                    v
               |                                   +---------------------+  +-------------------+
  +-----------------+  WR_CC, WR_CC_en             | instruction_decoder |  | operands_selector |<-- I0_X[7:0]
  | command_counter |<-----------------------------| FSM, selectors,     |  | literal, I0_X,    |--> Q0_X[7:0]
  |  3-bit, down    |----------------------------->| stack pointers      |  | Q0_X, M0_X, M1_X, |<-> M0_X 32x1
  +-----------------+  VAL_CC                      +---------------------+  | CRW_X, CRb_X      |<-> M1_X 32x32
                                                     | CRW_CH WR_W            +-------------------+
                                                     | CRb_CH WR_b               | A, ALU selects
                                                     v                           v
                                   +-------------------------+  B     +----------+  +---------+
                                   | dual_port_ram           |------->| word_alu |  | bit_alu |
                                   | A: 128 x 32  (CRW stack)|------->|          |  |         |
                                   | B: 4096 x 1  (CRb stack)|<-------+----------+  +---------+
                                   +-------------------------+   results written back (and to
                                                                 the operands selector for stores)
```

| Module | Role |
|---|---|
| `instruction_decoder` | Four-state FSM. It holds the command-counter selector, the two ALU operation selectors, the jump comparator and the stack pointers |
| `program_counter` | 8-bit PC. It increments on `inc_pc` and loads `IC[7:0]` on `wr_pc` |
| `program_memory` | 256 x 40 instruction store with a combinational read and a download port |
| `command_counter` | 3-bit down-counter. It sets how many cycles the execution state lasts |
| `operands_selector` | Registers the operand and the operation select of each ALU, and performs stores |
| `mem_bank` | Register bank, used as M0_X (32 x 1, memory bits) and M1_X (32 x 32, memory words) |
| `dual_port_ram` | Stacks of current results: CRW (128 x 32) and CRb (4096 x 1) |
| `word_alu` | 23 word operations and an output register |
| `fp_addsub`, `fp_mul`, `fp_div`, `fp_sqrt` | Combinational IEEE-754 single-precision units |
| `bit_alu` | 8 bit operations and an output register |
| `plc_pkg`, `fp_pkg` | Shared encodings and timing tables, and floating-point helpers |

## The instruction word

```
 39 38 | 37 ........ 32 | 31 .............................. 0
 type  | operation code | suffix: literal, or an index
```

| Data type `[39:38]` | Word instructions | Bit instructions |
|---|---|---|
| 0 | 32-bit literal in the suffix | input `I0_X[suffix[2:0]]` |
| 1 | stack entry `CRW_X[suffix[6:0]]` | memory bit `M0_X[suffix[4:0]]` |
| 2 | memory word `M1_X[suffix[4:0]]` | stack entry `CRb_X[suffix[11:0]]` |
| 3 | (treated as literal) | output `Q0_X[suffix[2:0]]` |

Operation codes (`plc_pkg`):

| Code | Word ALU select | | Code | |
|---|---|---|---|---|
| 0-3 | `ADD_I SUB_I MUL_I DIV_I` (signed 32-bit) | | 32 | `LD` |
| 4-7 | `ADD_R SUB_R MUL_R DIV_R` (REAL) | | 33-35 | `AND OR XOR` |
| 8-11 | `SL SR RL RR` (by `A[4:0]`) | | 36-37 | `ORN ANDN` |
| 12-17 | `AND_W OR_W XOR_W NOR_W NAND_W XNOR_W` | | 38 | `XNOR` |
| 18-19 | `GT ET` (result 1 or 0) | | 39 | `ST` |
| 20-21 | `ST_W LD_W` | | 63 | `JMP suffix[7:0]` |
| 22 | `SQRT_R` (REAL square root of B) | | | |

For a word operation the code is also the 5-bit word ALU select. The published
simulation shows `LD` = `10101`, `MUL_I` = `00010` and `DIV_I` = 3, which fixes
this numbering. Every operation computes **B op A**, as in IL. B is the current
result and A is the operand named by the instruction. So `SUB_R PV` computes
CR − PV and `DIV_I 67` computes CR / 67. `LD`/`LD_W` return A, and `ST`/`ST_W`
return B. `SQRT_R` ignores its operand. Codes 23-31 and 40-62 run as four-cycle
no-operations.

## The instruction cycle and its timing

Each instruction goes through four states:

1. **Initialization.** The command counter is loaded with the instruction's
   execution length minus one. The stack pointer of the ALU the instruction
   uses is incremented.
2. **Decoding** (`dec`). On the edge that ends this state, the operands selector
   captures the operand and the ALU select. A store also takes place on this edge.
3. **Execution** (`exe` for word instructions, `exe_b` for bit instructions).
   The ALUs are combinational. The execution state lasts until VAL_CC reaches 0,
   which gives slow operations the cycles they need to settle. In the last
   cycle the ALU output register loads and `inc_pc` is asserted.
4. **Instruction fetch.** The result is written into the new stack slot. The PC
   already addresses the next instruction, and if that instruction is a `JMP`,
   the PC loads the target at the end of this state.

A `JMP` after another instruction therefore costs no cycles. A `JMP` reached
directly, after reset or through another jump, takes one cycle in
initialization.

The length of the execution state comes from the measured cycle counts of two
FPGA builds. `TIMING = TIMING_XPLC` is the default (Artix-7, 100 MHz) and
`TIMING_IPLC` is the alternative (Cyclone IV, 50 MHz):

| Instruction | XPLC execution / total clocks | IPLC execution / total clocks |
|---|---|---|
| `ADD_I` | 2 / 5 | 1 / 4 |
| `DIV_I` | 8 / 11 | 1 / 4 |
| `ADD_R` | 3 / 6 | 1 / 4 |
| `SUB_R` | 4 / 7 | 2 / 5 |
| `MUL_R` | 3 / 6 | 2 / 5 |
| `DIV_R` | 8 / 11 | 4 / 7 |
| `SQRT_R` | 8 / 11 | 4 / 7 |
| all others | 1 / 4 | 1 / 4 |

These counts are only correct if the design meets them as multicycle paths
when it is implemented. In simulation every ALU result is ready at once.

## The stacks of current results (CRW and CRb)

The dual-port RAM and its pointers are the least conventional part of the
design.

- **Every result is kept.** Each word instruction writes its result into the
  next slot of the CRW stack, and each bit instruction into the next slot of
  the CRb stack. The slot below the pointer is always the current result B,
  which is the B input of the ALU.
- **Brackets use slot numbers.** An IL expression such as
  `ADD_R( Ki … )` is written without hardware brackets. The inner expression
  is started with a plain load, and the closing bracket becomes an operation
  whose operand is an older slot, for example `ADD_R` with data type CRW_X and
  suffix 2. After reset, and after every taken `JMP`, the pointers restart, so
  the *n*-th word result of a scan is always in `CRW_n`. If every line of a
  program is a word instruction, `CRW_n` is the result of line *n*.
- **One array, two views.** Port A (128 x 32) and port B (4096 x 1) address
  the same 4096 bits. CRb bit *n* is bit *n mod 32* of CRW word *n / 32*. The
  first 32 bit results of a scan therefore share storage with CRW_0, the next
  32 with CRW_1, and so on. A program that reads old word slots must not
  overwrite them with bit results. For example, it can keep its bit logic and
  the word expressions it reads back in separate scans, or place the word
  expressions at slots above the bit count.
- **Addressing per state.** In decoding, the port address is the suffix when
  the operand is a stack entry. In execution it is the current result (B). In
  fetch it is the slot being written. Reads are combinational.

The first instruction after reset or after a jump sees an undefined B, so it
should be a load.

## Operands and stores

The operands selector registers the operand on the edge that ends decoding.
For word instructions the operand is a literal, `CRW_X` or `M1_X`. For bit
instructions it is `I0_X`, `M0_X`, `CRb_X` or `Q0_X`. Stores happen on the same
edge:

- `ST_W` to a memory word writes the word ALU output register into `M1_X`.
- `ST` to a memory bit writes the bit ALU output register into `M0_X`.
- `ST` to an output writes it into `Q0_X`.

On that edge the output registers still hold the previous result of their ALU,
and that is exactly the value IL's `ST` stores. `ST` also pushes that value
onto the stack, like any other instruction.

`M0_X`, `M1_X` and `Q0_X` are cleared by reset. A store to a literal, an input
or a stack entry is ignored.

## Arithmetic

- Integers are signed 32-bit values. Division by zero gives −1, and
  −2³¹ / −1 gives −2³¹.
- `SL` and `SR` are logical shifts, and `RL` and `RR` rotate.
- REAL operations use IEEE-754 single precision with round to nearest even.
- `fp_sqrt` computes the root digit by digit, two radicand bits per step,
  with the remainder as the sticky bit.
- `fp_addsub` is built in five steps: unpack, align (guard, round and sticky
  bits), add or subtract, normalize and round, then pack. A condition detector
  handles NaN, infinity, overflow, underflow and zero.
- Subnormal numbers are read as zero and results below the normal range
  become zero. Every NaN comes out as `7FC00000`.

## Writing and running a program

Hold `rst` high and write instructions through `prog_we`, `prog_addr` and
`prog_data`. Then release `rst`; execution starts at address 0. Inputs are on
`i0_x` and outputs on `q0_x`. The outputs `pc`, `state`, `word_result` and
`bit_result` are for observation only.

The PID step below is how `tb/tb_plc_microprocessor.sv` runs the controller.
The constants are first stored in M1_X (SP = 0, PV = 1, Kp = 2, Ki = 3, I = 4,
PE = 5, Kd = 6, Ts = 7, OUT = 8):

```
00 LD_W  M1[SP]     06 LD_W  M1[PV]     0C LD_W  M1[SP]     12 ST_W M1[PE]
01 SUB_R M1[PV]     07 SUB_R M1[PE]     0D SUB_R M1[PV]
02 MUL_R M1[Kp]     08 MUL_R M1[Kd]     0E MUL_R M1[Ts]
03 LD_W  M1[Ki]     09 DIV_R M1[Ts]     0F ADD_R M1[I]
04 MUL_R M1[I]      0A ADD_R CRW_5      10 ST_W  M1[I]
05 ADD_R CRW_2      0B ST_W  M1[OUT]    11 LD_W  M1[PV]
```

This computes Q = Kp(SP−PV) + Ki·I + Kd(PV−PE)/Ts, then I += (SP−PV)·Ts and
PE = PV. It takes 106 clocks with the default table (1.06 µs at 100 MHz) and
86 clocks with the IPLC table (1.72 µs at 50 MHz). The original builds are
reported at 0.99 µs and 1.62 µs. Those figures cannot be reproduced from the
per-instruction counts and the listing.

## Departures and choices

Some of these add to the published design and some depart from it:

- **Edges.** Everything is on the rising edge of one clock. The original loads
  the PC after a jump on the falling edge. It also shows the word ALU result
  during the first execution cycle, whereas here it appears at the end of the
  last one.
- **Bit ALU output register.** The bit ALU has an output register, loaded like
  the word ALU's, so that the value being written does not change while the
  CRb port moves to the write slot.
- **Separate enables.** `exe` and `exe_b` are separate, so that each ALU loads
  its register only for its own instructions.
- **Clock enables.** The original gates clocks with `exe`; here the clock is
  enabled instead, and the floating-point units are combinational.
- **Square root.** The original word ALU contains a square-root unit, but
  its instruction set has no instruction for it. Here it is reached through
  `SQRT_R`, select 22, and given the execution length of `DIV_R`. Both are
  this design's choices.
- **Encodings, data-type codes and stack behaviour** are chosen as described
  above. These are the numeric opcodes for non-word operations, the data-type
  codes, pointer reset on `JMP`, and pointers that advance only for their own
  ALU.
- **Instructions missing from the timing table.** Load, store and jump are
  given one execution cycle.
- **Additions.** The program download port and the observation outputs are
  additions.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv rtl/plc_pkg.sv tb/fp_ref_pkg.sv tb/tb_plc_microprocessor.sv \
    --top-module tb_plc_microprocessor -o sim
./obj_dir/sim
```

Replace the testbench name to run another test.

- `tb_plc_microprocessor` runs the whole processor at its defaults. It covers
  the three-line test program `LD 124 / MUL_I 5 / JMP 00` (result 620,
  4 clocks per instruction, free jump). It then runs two scans of the PID
  program above, a bit-logic section, an integer section and a square root. Every expected
  value is computed in the testbench, and the PID clock count is checked.
- `tb_pid_timing` runs the PID loop on a default processor and an IPLC-timed
  one side by side. It checks the loop period (106 and 86 clocks) and the
  results of three scans.
- `tb_instruction_timing` runs all 26 timed instructions on a default
  processor and on an IPLC-timed one, and checks every total clock count in
  the table above.
- The floating-point testbenches compare against a model in `tb/fp_ref_pkg.sv`.
  The model computes in double precision and rounds to single in integer
  arithmetic. This is exact for +, −, × and ÷ because double precision has
  more than 2·24+2 significand bits.
  This holds for the square root as well.

The word ALU is the largest block by far: four combinational floating-point
units and a 32-bit divider.
