# A four-bit custom computer in SystemVerilog

This is a small computer with a four-bit datapath and a 16-bit instruction
word. It runs 22 instructions:

- three-register arithmetic and logic;
- rotates through carry;
- moves and immediate loads;
- loads and stores into a banked data memory, with direct or register-indirect offsets;
- bit tests that skip the next instruction;
- jumps, subroutine calls and returns.

Each instruction is two bytes in a byte-wide program memory.

The machine was first built as a two-chip system. A microcontroller ran
firmware that fetched and decoded the instructions. A separate
programmable-logic device was the ALU. Twelve wires ran to the ALU: two
4-bit operands, a 3-bit mode and carry in. Six wires came back: the 4-bit
result, carry out and zero. This RTL keeps that split. `cc_controller` does
the sequencer's job in dedicated logic. `cc_alu` is the ALU. The two talk
only over that 12-line/6-line bus. The bus is also brought out of the top,
where the original showed it on lamps.

## Instruction set

The opcode is in bits 15:12. `a`, `b` and `c` are 4-bit register numbers.
`k` is a literal. `x` bits are ignored. Bit 7 (bit 11 for jumps) picks
between two forms of the same opcode.

| Opcode | Encoding              | Assembly      | Effect                                         | Flags |
|--------|-----------------------|---------------|------------------------------------------------|-------|
| 0      | `0000 xxxx xxxx xxxx` | NOP           | nothing (plus a delay, see below)              | –     |
| 1      | `0001 aaaa bbbb cccc` | ADD Ra,Rb,Rc  | Ra = Rb + Rc                                   | Z,C   |
| 2      | `0010 aaaa bbbb cccc` | SUB Ra,Rb,Rc  | Ra = Rb − Rc, C = 1 when no borrow             | Z,C   |
| 3      | `0011 aaaa bbbb cccc` | AND Ra,Rb,Rc  | Ra = Rb & Rc                                   | Z     |
| 4      | `0100 aaaa bbbb cccc` | IOR Ra,Rb,Rc  | Ra = Rb \| Rc                                  | Z     |
| 5      | `0101 aaaa bbbb cccc` | XOR Ra,Rb,Rc  | Ra = Rb ^ Rc                                   | Z     |
| 6      | `0110 aaaa 0xxx bbbb` | RRL Ra,Rb     | Ra = Rb rotated left through C                 | C     |
| 6      | `0110 aaaa 1xxx bbbb` | RRR Ra,Rb     | Ra = Rb rotated right through C                | C     |
| 7      | `0111 aaaa xxxx bbbb` | NOT Ra,Rb     | Ra = ~Rb                                       | Z     |
| 8      | `1000 aaaa 1xxx bbbb` | MOV Ra,Rb     | Ra = Rb                                        | Z     |
| 8      | `1000 aaaa 0xxx kkkk` | MOV Ra,k      | Ra = k                                         | Z     |
| 9      | `1001 aaaa 0kkk kkkk` | LOD Ra,k      | Ra = M[bank][k]                                | Z     |
| 9      | `1001 aaaa 1xxx bbbb` | LOD Ra,@Rb    | Ra = M[bank][{Rb,Rb+1} & 0x7F]                 | Z     |
| A      | `1010 aaaa 0kkk kkkk` | STO k,Ra      | M[bank][k] = Ra                                | Z     |
| A      | `1010 aaaa 1xxx bbbb` | STO @Ra,Rb    | M[bank][{Ra,Ra+1} & 0x7F] = Rb                 | Z     |
| B      | `1011 aaaa 0xxx xbbb` | TSC Ra,b      | skip next instruction if bit b of Ra is 0      | –     |
| B      | `1011 aaaa 1xxx xbbb` | TSS Ra,b      | skip next instruction if bit b of Ra is 1      | –     |
| C      | `1100 0kkk kkkk kkkk` | JMP k         | PC = k                                         | –     |
| C      | `1100 1xxx xxxx aaaa` | JMP @Ra       | PC = {Ra,Ra+1,Ra+2} & 0x7FF                    | –     |
| D      | `1101 0kkk kkkk kkkk` | JSR k         | push PC+1; PC = k                              | –     |
| D      | `1101 1xxx xxxx aaaa` | JSR @Ra       | push PC+1; PC = {Ra,Ra+1,Ra+2} & 0x7FF         | –     |
| E      | `1110 xxxx xxxx xxxx` | RET           | PC = pop                                       | –     |

Indirect operands are the hardest part to read. In the table, `{Ra,Ra+1}` is
two consecutive 4-bit registers joined into one number, with the named
register as the most significant nibble. `{Ra,Ra+1,Ra+2}` is three of them.
So a 7-bit memory offset is held in a register pair, and an 11-bit jump
target in a register triple. Register numbers wrap from 15 to 0.

For MOV, LOD and STO, Z is set from the word moved. For STO that is the
word stored. A bit test names bits 0–7, but registers have only four bits,
so bits 4–7 test as 0.

Opcode `1111` is not part of the set. It runs as a NOP without the delay.
That matters because erased program memory reads `FF FF`, so running off
the end of a program is harmless.

### Example

`MOV R0,5` is `1000 0000 0000 0101`. It is stored as byte `0x80` at address
`2*PC` and byte `0x05` at address `2*PC+1`. This is the logic-survey test
program the testbench runs:

```
80 01   MOV R0,1
81 03   MOV R1,3
12 01   ADD R2,R0,R1   -> R2 = 0100, C = 0
00 00   NOP
32 01   AND R2,R0,R1   -> 0001
00 00   NOP
42 01   IOR R2,R0,R1   -> 0011
00 00   NOP
52 01   XOR R2,R0,R1   -> 0010
00 00   NOP  (x3)
C0 00   JMP 0
```

## How an instruction runs

`cc_controller` is a six-state machine. The program memory has a one-clock
read latency.

| State  | Work                                                                      |
|--------|---------------------------------------------------------------------------|
| FETCH1 | drive `2*PC` to the program memory                                        |
| FETCH2 | latch the upper byte; drive `2*PC+1`                                      |
| FETCH3 | latch the lower byte                                                      |
| EXEC   | decode, read up to three registers, then act                              |
| ALUWB  | ALU instructions only: write the result and flags back                    |
| DELAY  | NOP only: wait `NOP_DELAY` clocks                                         |

In EXEC:

- An ALU instruction registers its operands, mode and the C flag onto the ALU bus and moves to ALUWB.
- A NOP starts its delay.
- Every other instruction writes its register, memory word, stack and PC in that same cycle.

| Instruction kind              | Clocks          |
|-------------------------------|-----------------|
| MOV, LOD, STO, tests, jumps, calls, returns, opcode F | 4 |
| ADD, SUB, AND, IOR, XOR, RRL, RRR, NOT | 5      |
| NOP                           | 4 + `NOP_DELAY` |

`done` pulses in the last clock of every instruction.

The ALU bus is registered. It keeps the last ALU operation's operands and
result until the next ALU instruction. Anything watching the bus, such as
lamps, therefore holds still through a run of NOPs. That is why the NOP
delay exists: the original used long NOPs between operations so a person
could read the lamps. Set `NOP_DELAY = 0` for a plain one-instruction NOP.

The PC is 11 bits, because jump targets are 11 bits. The first byte of an
instruction is at address `2*PC`, and an instruction can never be fetched
half-way. With 256 bytes of program memory only instructions 0–127 exist.
Higher PC values wrap, because the byte address is cut to 8 bits.

## The ALU (`cc_alu`)

Combinational. `Y`, `Cout` and `Z` follow the inputs.

| Mode | Name | Y                         | Cout                          |
|------|------|---------------------------|-------------------------------|
| 000  | AND  | A & B                     | Cin                           |
| 001  | OR   | A \| B                    | Cin                           |
| 010  | XOR  | A ^ B                     | Cin                           |
| 011  | SHCL | {A[2:0], Cin}             | A[3]                          |
| 100  | SHCR | {Cin, A[3:1]}             | A[0]                          |
| 101  | NOT  | ~A                        | Cin                           |
| 110  | SUB  | A − B                     | carry out of A + ~B + 1       |
| 111  | ADD  | A + B                     | carry out of A + B            |

ADD and SUB do not use Cin. `Z = (Y == 0)` in every mode. The sequencer
maps each instruction to one mode: RRL uses SHCL, RRR uses SHCR, IOR uses
OR. It decides which of Z and C to keep according to the flags column of
the instruction table.

## Storage

- **Registers (`cc_regfile`)**: sixteen 4-bit registers. Four asynchronous read ports: three for the sequencer (STO @Ra,Rb and JMP @Ra each need three registers at once) and one for the `dbg_reg_*` window. One write port. Reset clears the registers.
- **Data memory (`cc_data_mem`)**: 4 banks × 128 words × 4 bits. It has an asynchronous read, a clocked write and no reset. LOD and STO supply only the 7-bit offset. The bank comes from the `bank_sel` input, since no instruction changes it. A second read port serves `dbg_mem_*`.
- **Program memory (`cc_eeprom`)**: 256 bytes. Synchronous read, with data one clock after the address. Every byte starts erased at `0xFF`. Load it through `prog_we/prog_addr/prog_data` while `rst` is held. The running machine never writes it.
- **Return stack (`cc_stack`)**: 8 entries of 11 bits. The counter `stcnt` is the number of entries; the top is entry `stcnt−1`.
  - A push on a full stack is dropped and sets `stack_overflow`.
  - A RET on an empty stack returns to address 0 and sets `stack_underflow`.
  - Both flags stay set until reset.

## Departures from the two-chip original

- The original kept the sixteen registers as spare microcontroller RAM, at a fixed offset inside one data bank. Here the registers are separate. A LOD or STO can never reach them.
- Memory words are 4 bits, the width of a register. The original's RAM is byte-wide. How it fitted a byte into a 4-bit register is not recorded.
- These are all choices made here, not properties of the original:
  - one clock and a synchronous reset;
  - the cycle counts above;
  - the `bank_sel` input;
  - the debug windows;
  - the stack depth and how its ends behave;
  - the NOP delay length (1000 clocks);
  - how opcode `1111` and bit tests on bits 4–7 behave.
- Not included, because they have no logic function: the RC timer that made the clock (about 10 MHz), and the indicator lamps.

## Parameters (`cc_computer`)

| Parameter     | Default | Meaning                                      |
|---------------|---------|----------------------------------------------|
| `EE_DEPTH`    | 256     | program memory bytes                         |
| `NBANKS`      | 4       | data memory banks of 128 words               |
| `STACK_DEPTH` | 8       | return addresses held                        |
| `NOP_DELAY`   | 1000    | extra clocks spent by NOP (0 for none)       |

The word width, register count, PC width and opcode and mode codes are in
`rtl/cc_pkg.sv`.

## Files

| File                    | Contents                                          |
|-------------------------|---------------------------------------------------|
| `rtl/cc_pkg.sv`         | widths, opcode and ALU-mode enums, ALU bus structs |
| `rtl/cc_computer.sv`    | top level                                         |
| `rtl/cc_controller.sv`  | fetch/decode/execute sequencer, Z/C flags         |
| `rtl/cc_alu.sv`         | 4-bit ALU                                         |
| `rtl/cc_pc.sv`          | program counter and `2*PC` byte address           |
| `rtl/cc_regfile.sv`     | 16 × 4-bit registers                              |
| `rtl/cc_data_mem.sv`    | banked data memory                                |
| `rtl/cc_eeprom.sv`      | byte-wide program memory                          |
| `rtl/cc_stack.sv`       | return-address stack                              |
| `tb/cc_iss_pkg.sv`      | instruction-level reference model (testbench only) |
| `tb/tb_*.sv`            | self-checking testbenches                          |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog.
For example, for the whole machine:

```
verilator --binary --timing --assert --top-module tb_cc_computer \
  rtl/cc_pkg.sv tb/cc_iss_pkg.sv rtl/*.sv tb/tb_cc_computer.sv
./obj_dir/Vtb_cc_computer
```

For one block, list the package, the block's file and its testbench, for
example `rtl/cc_pkg.sv rtl/cc_alu.sv tb/tb_cc_alu.sv`. The controller's
testbench also needs `tb/cc_iss_pkg.sv`.

What the testbenches establish:

- `tb_cc_computer`, at default parameters:
  - runs the logic-survey program and checks R2 and the ALU bus after each operation;
  - runs directed stack overflow and underflow programs;
  - runs eight random 128-instruction programs, 1500 instructions each, in random banks, switching bank now and then.
  - After every instruction it compares the PC, flags, all registers, the stack and the clock count with `cc_iss_pkg`. It compares the data memory after each program.
  - It fails if any mechanism never occurred. The mechanisms are each ALU mode, taken and untaken skips, indirect memory and jumps, calls and returns, overflow and underflow, NOP delays, bank switches and the undefined opcode.
- `tb_cc_counter` runs a down-counter built from MOV, SUB, JMP, TSC and TSS. It checks the count on the ALU bus over two rounds, and every instruction's clock count.
- `tb_cc_controller` tests the sequencer alone. It models everything around it in the testbench and runs 10,000 random instructions against the reference model.
- The block testbenches check the ALU exhaustively (4096 cases) and test the PC, registers, data memory, program memory and stack against small models.

The reference model is written from the instruction table, not from the RTL.
A misreading shared by both would not be caught. The encodings and the
worked example above are the ground truth to hold them against.
