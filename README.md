# An 8-bit PIC-style RISC core with a 16-bit co-operative ALU

An 8-bit microcontroller core has to build a 16-bit addition from a chain of
byte operations: load the low bytes, add them, test the carry, correct the
high byte, add the high bytes. On a PIC16x84-class core that takes six
instructions. This design adds a small **co-operative ALU (CALU)** next to the
ordinary 8-bit ALU. The CALU has its own operand and result registers in the
data memory map and a 16-bit carry select adder. Two new instructions,
**ADD16** and **SUB16**, use it. Each finishes in a single instruction cycle,
and the program never moves operands through W.

The rest is a PIC16x84-compatible mid-range core: 35 instructions, W
register, banked register file with indirect addressing, 13-bit program
counter with an 8-level return stack, and a two-stage fetch/execute
pipeline. The instruction word is 15 bits wide instead of 14. With bit 14
clear, a word is an ordinary PIC16x84 instruction. With bit 14 set, it is a
CALU instruction.

```
          +------------------------- soft_computational_engine -----------------------+
          |                                                                             |
 program  |  program_memory     +----------------------- pic_core -------------------+ |
 load --->|  1024 x 15  ------->  fetch_pipeline -> instruction_decoder             | |
 port     |      ^              |   (inst_reg)          |  ctrl_t                     | |
          |      |  prog_adr    |  timing_control       v                             | |
          |      +--------------+  (Q1..Q4)      aluinp1/2 -> alu -> aluout ---+      | |
          |                     |  program_counter            ^                |      | |
          |                     |  (pc, stack)          data_memory <----------+----> ram_* ports
          |                     |                       (RAM, STATUS, FSR,     |      | |
          |                     |                        PCLATH, map)          |      | |
          |                     |                             ^ v              |      | |
          |                     |                       calu (operand/result regs,    | |
          |                     |                        carry_select_adder_16bit)    | |
          |                     +-----------------------------------------------------+ |
          +-----------------------------------------------------------------------------+
```

## The instruction cycle

Every instruction takes one **instruction cycle of four clocks**, called Q1
to Q4. `timing_control` steps through them. Its state register uses the
codes 100 (reset), 000 (Q1), 001 (Q2), 011 (Q3) and 010 (Q4). What happens
on the clock edge that ends each phase:

| phase | work |
|-------|------|
| Q1 | `inst_reg` is stable and decoded (combinational, `instruction_decoder`) |
| Q2 | operand latch: `aluinp1_reg` gets the file register (or the literal), `aluinp2_reg` gets W |
| Q3 | `aluout_reg` and the ALU flags are latched; for ADD16/SUB16 the CALU latches its 16-bit result and flags |
| Q4 | write-back to W or the file register, STATUS flag update, program counter update, next instruction word loaded into `inst_reg` |

The data memory is read combinationally during Q1/Q2 at the address given
by the instruction (or by FSR), and it is written once, at the end of Q4.
The same holds for the CALU registers. ADD16 therefore sees every operand
written by the instructions before it, and the instruction after it can
read CALU Out.

### Fetch/execute overlap and flushes

`pc_reg` always holds the address being *fetched*. While the instruction at
address A executes, the program memory is read at A+1. At the end of Q4 that
word moves into `inst_reg` (`fetch_pipeline`), and the counter moves to A+2.
The program memory has one clock of read latency, which the four-clock
cycle hides.

When the executing instruction changes the flow, the prefetched word is
wrong. It is replaced by a NOP, and the target is fetched in the next cycle.
The flow changes are GOTO, CALL, RETURN/RETLW/RETFIE, a taken skip
(DECFSZ, INCFSZ, BTFSC, BTFSS) and any write to PCL. Such instructions
take two instruction cycles, as on the PIC16x84. `flush_o` marks the Q4
clock of such a cycle. Because the counter is one ahead, a read of PCL
returns the low byte of A+1, and CALL pushes A+1. Computed jumps
(`ADDWF PCL,F`) and RETLW tables therefore behave as on the PIC.

Jump and call targets are `{PCLATH[4:3], k[10:0]}`. A PCL write goes to
`{PCLATH[4:0], value}`. The stack is circular with eight entries and no
overflow flag. It is cleared by reset, so a RETURN without a CALL goes to 0.

## The co-operative ALU

`calu` holds six byte registers, visible in the data memory at both banks:

| address | register | access |
|---------|----------|--------|
| 0x50 | `caluinp1h` operand 1, high byte | read/write |
| 0x51 | `caluinp1l` operand 1, low byte | read/write |
| 0x52 | `caluinp2h` operand 2, high byte | read/write |
| 0x53 | `caluinp2l` operand 2, low byte | read/write |
| 0x54 | CALU Out, high byte | read only |
| 0x55 | CALU Out, low byte | read only |

| instruction | 15-bit code | operation | flags |
|-------------|-------------|-----------|-------|
| ADD16 | `100011100001100` | CALU Out = op1 + op2 | C, DC, Z |
| SUB16 | `100010000001100` | CALU Out = op1 - op2 | C, DC, Z |

The flags are defined as for the 8-bit ALU, widened to 16 bits:
- **C** is the carry out of bit 15. For SUB16 it is 1 when no borrow occurs.
- **DC** is the carry out of bit 3.
- **Z** is set when the 16-bit result is zero.

Subtraction runs on the same adder as op1 + ~op2 + 1; the carry-in
`calu_cin` is 1 for SUB16. Other words with bit 14 set execute as a NOP.

A 16-bit addition then reads:

```
MOVF  x_hi,W  ; MOVWF 0x50       ; operands, if not already there
...
ADD16                             ; one instruction cycle
MOVF  0x54,W  ; MOVF 0x55,W       ; result bytes, as needed
```

Against the 6-instruction byte sequence, the arithmetic itself costs 1
instruction cycle instead of 6. The operands must be in the CALU registers.
Code that keeps its 16-bit variables there saves the 5 cycles outright.

### Carry select adder

`carry_select_adder_16bit` is built from four 4-bit slices:
- Bits 3:0 use a plain ripple carry adder (`ripple_carry_4_bit`, instance `rca1`).
- Bits 7:4, 11:8 and 15:12 each use a `carry_select_adder_4bit_slice`
  (`csa_slice1..3`).
- Each slice computes its sum twice, for carry-in 0 and carry-in 1, with two
  ripple adders.
- The carry from the slice below only drives the multiplexer that picks one
  result. The critical path is therefore one 4-bit ripple plus three
  multiplexers, not a 16-bit ripple.

## Data memory map

`data_memory` forms the 8-bit address in one of two ways:
- direct: `{STATUS.RP0, f}`;
- indirect: the whole FSR, when the instruction names INDF (`f = 0`).

Bit 7 of the address selects the bank. Only the SFRs below are implemented,
in both banks. Everything not listed reads as zero and ignores writes.

| address | contents |
|---------|----------|
| 0x00 | INDF (indirect access through FSR) |
| 0x02 | PCL (low byte of the program counter; a write jumps) |
| 0x03 | STATUS: IRP, RP1, RP0, TO, PD, Z, DC, C |
| 0x04 | FSR |
| 0x0A | PCLATH (5 bits) |
| 0x0C-0x4F | 68 bytes of general purpose RAM (same bytes in both banks) |
| 0x50-0x55 | CALU registers |

STATUS resets to 0x18. TO and PD are read-only. When an instruction writes
STATUS and also sets flags, the flags win. The general purpose RAM is not
reset.

## Instruction set notes

All PIC16x84 mid-range instructions are decoded with their usual
encodings, in bits 13:0 with bit 14 clear. This core has no timer, watchdog,
EEPROM, I/O ports or interrupts, so three instructions are reduced:
- SLEEP and CLRWDT execute as NOP.
- RETFIE is a plain RETURN.

## Top level

`soft_computational_engine` has one parameter, `PMEM_DEPTH` (default 1024).

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_i` | in | 1 | clock; four clocks per instruction |
| `rst_i` | in | 1 | synchronous reset, active high |
| `pmem_we_i`, `pmem_wadr_i`, `pmem_wdat_i` | in | 1, 13, 15 | program memory write port; load while `rst_i` is high |
| `ram_we_o`, `ram_adr_o`, `ram_dat_o` | out | 1, 8, 8 | data memory write bus, valid on the Q4 clock; the 8-bit address includes the bank bit |
| `state_o` | out | 3 | Q-phase state |
| `pc_o` | out | 13 | fetch address |
| `w_o`, `status_o` | out | 8, 8 | W and STATUS |
| `caluout_o` | out | 16 | CALU Out |
| `inst_done_o` | out | 1 | high on the Q4 clock of every instruction cycle |
| `flush_o` | out | 1 | high on that clock when the prefetched word is discarded |

After reset is released, the core executes one NOP while it fetches address
0, then runs the program from address 0. The program memory aliases when
`PMEM_DEPTH` is less than 8K words.

The core has no I/O devices. The data write bus is the place to attach
memory-mapped peripherals or to observe the program.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/` named
`tb_<module>`. Each ends with a line `TB_RESULT checks=N failures=M`.

- **Arithmetic blocks.** The 4-bit adders are checked exhaustively. The
  16-bit adder, ALU and CALU are checked against integer arithmetic on
  random and corner-case operands. The CALU test includes 0x0055 + 0x5500 =
  0x5555 and 0xFFFF - 0x5500 = 0xAAFF.
- **Control blocks.** The sequencer, program counter, fetch register,
  decoder, register file and program memory are checked against small
  models kept in their testbenches.
- **`tb_pic_core`** runs 40 random programs of 1000 instruction cycles in
  lockstep with an instruction-level model of the whole instruction set,
  `tb/pic_iss_pkg.sv`. After every instruction it compares pc, W, STATUS,
  CALU Out and the data write. It also checks that every instruction cycle
  is four clocks.
- **`tb_soft_computational_engine`** uses the top at its default size and
  works in two phases:
  1. A directed program. The 6-instruction byte sequence for a 16-bit add
     is run with and without a carry between the bytes, and must take 6
     instruction cycles. ADD16 and SUB16 must take 1 each. The program also
     exercises a CALL/RETLW pair, a computed jump through PCL, indirect
     addressing, a bank-1 access and a DECFSZ loop. Each of these mechanisms
     is counted, and one that never occurs is a failure.
  2. Ten random programs in lockstep with the instruction-level model.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/pic_pkg.sv tb/pic_iss_pkg.sv tb/tb_soft_computational_engine.sv \
    --top-module tb_soft_computational_engine -o sim
./obj_dir/sim
```

The same command works for any other testbench. Only the testbenches of the
core and the top need `tb/pic_iss_pkg.sv`. Every testbench finishes in
seconds.

## What is specified and what is this design's own

Taken from the description of the enhanced core:
- a co-operative ALU built around a 16-bit carry select adder, made of a
  4-bit ripple carry slice and three 4-bit carry select slices;
- dedicated operand and result registers in the data memory;
- ADD16 and SUB16, affecting Carry, Zero and Digit carry, each completing in
  one instruction cycle against six for the byte sequence;
- the 15-bit instruction word and 13-bit program address;
- the four-phase state encoding and the register names used here.

The ADD16 code is the published one. The SUB16 code is the instruction
word that appears in the published SUB16 simulation. Both codes are
constants in `rtl/pic_pkg.sv`, so they are easy to change.

This design's own choices, where the description is silent:
- the CALU register addresses (0x50-0x55) and that CALU Out is read-only;
- the 16-bit definition of DC (carry out of bit 3);
- the phase in which each step happens;
- the program memory depth and its load port;
- reset behaviour, including the cleared return stack.

The base-core behaviour follows the PIC16x84 the enhanced core starts
from: instruction encodings, flag rules, the register map, the stack and
the two-stage pipeline.

Not included:
- The architecture also names a **Flushing Avoidance System**, a hazard
  avoidance unit for the pipeline. No mechanism is described for it, so the
  pipeline here keeps the ordinary flush-on-branch behaviour.
- The architecture also names an **SID/SOD** (serial in/out) interface.
  Nothing about it is described; its place is taken by the data write bus
  ports.
- The pipeline is labelled "N stage" without a value. It is built with the
  base core's two stages.
- The reference implementation reports 29.95 MHz and 83.94 mW on an FPGA.
  No device is named, and those figures are not reproduced here.
