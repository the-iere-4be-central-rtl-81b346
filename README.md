# IERE-4BE: a 4-bit micro-programmed CPU in SystemVerilog

The IERE-4BE is a deliberately small teaching processor. It has a 4-bit accumulator, a
4-bit data bus and a 12-bit address bus (4K x 4 of memory). Every instruction is carried
out by a micro-program held in a ROM. The original machine was built from 74LS-series
TTL parts and EPROMs so that students could watch every register and change the
instruction set by reprogramming the EPROMs. This repository is a synthesizable,
single-clock re-creation of that machine. It keeps the original's register set, bus
structure, micro-instruction word, two-level micro-program vectoring and opcodes. Where
the original description is silent, this design makes its own choices, and it marks
them in this file and in each source file's header.

The machine has two halves:

* The **Data Unit** holds the registers and the ALU on a 4-bit internal bus.
* The **Control Unit** reads the instruction register and the two condition flags, and
  steps through the micro-program.

The Control Unit is the unusual part, so it gets most of the room below.

## Programmer's model

Only three registers are visible to the programmer:

| Register | Width | Use |
|---|---|---|
| A  | 4  | accumulator, first ALU operand |
| CC | 2  | condition flags: Z (result was zero), C (carry, or borrow after a subtract) |
| PC | 12 | programme counter; memory addresses come straight from it or from the instruction |

Memory is 4096 nybbles. Every instruction begins with a two-nybble opcode, high nybble
first. Bit 7 of the opcode (the top bit of the first nybble) selects the addressing mode:

* **Inherent and immediate** (bit 7 = 0): three nybbles, the opcode and then one operand
  nybble. Inherent instructions ignore the operand nybble, but it must be present.
  Example: `LDA #$F` is `0 1 F`.
* **Indirect** (bit 7 = 1): five nybbles, the opcode and then a 12-bit address, lowest
  nybble first. The operand is the nybble stored at that address. Example: `LDA $020` is
  `8 1 0 2 0`.

### Instruction set

Times are in micro-cycles. One micro-cycle is four periods of the master clock.

| Mnemonic | Immediate | Indirect | Inherent | Operation | C | Z | Micro-cycles |
|---|---|---|---|---|---|---|---|
| LDA  | 01 | 81 |    | A <- M                  | cleared | * | 10 / 16 |
| STA  |    | 82 |    | M <- A                  |   |   | 16 |
| ADDA | 03 | 83 |    | A <- A + M              | carry  | * | 10 / 16 |
| SUBA | 04 | 84 |    | A <- A - M              | borrow | * | 10 / 16 |
| CMPA | 06 | 86 |    | flags of A - M          | borrow | * | 9 / 15 |
| ANDA | 07 | 87 |    | A <- A and M            |   | * | 10 / 16 |
| ORA  | 08 | 88 |    | A <- A or M             |   | * | 10 / 16 |
| ASLA |    |    | 05 | C <- A3, A <- A << 1    | * | * | 9 |
| ASRA |    |    | 20 | C <- A0, A <- A >> 1, A3 kept | * | * | 9 |
| NOTA |    |    | 09 | A <- not A              |   | * | 9 |
| BGT  |    | 8A |    | branch if C=0 and Z=0   |   |   | 14 not taken, 15 taken |
| BLT  |    | 8B |    | branch if C=1 and Z=0   |   |   | same |
| BEQ  |    | 8C |    | branch if Z=1           |   |   | same |
| BNE  |    | 8D |    | branch if Z=0           |   |   | same |
| BGE  |    | 8E |    | branch if C=0           |   |   | same |
| BLE  |    | 8F |    | branch if C=1           |   |   | same |
| HALT |    |    | 10 | stop until reset        |   |   | 7, then its one word repeats |

A branch's operand is its target address. After `CMPA`, C=1 means A < M, and BGT/BLT
then mean "greater" and "less". BLE tests C=1 only, so it behaves as "less than". Any
opcode not in the table executes as a no-operation.

The original description gives the machine 18 instructions, seven of them branches, but
names only the 17 above. The missing branch has no known opcode and is not built. The
micro-program is easy to extend (see the last section) if you want an unconditional jump.

## How an instruction runs

Every instruction is made of three phases, each a short micro-program:

1. **Opcode fetch**, micro-addresses 0 to 4. The first nybble goes to IRH and the second
   to IRL. The PC is incremented after each nybble.
2. **Operand fetch**. One of two versions runs:
   * Direct, addresses 5 and 6: one nybble is read into DRIN.
   * Indirect, addresses 7 to 14: three nybbles are read into MARL, MARM and MARH. The
     address latch then takes the MAR, and the operand is read into DRIN.
3. **Execute**, addresses 15 to 54. One sequence per instruction, ending with EOE.

### Two-level vectoring

The Control Unit never decodes an opcode with logic. It looks opcodes up in two ROMs:

* The **control store** holds 256 micro-instructions of 24 bits.
* The **control store vector table** (CSVT) holds 256 start addresses. It is addressed by
  {IR7, VTPR}.
* The **VTPR** (vector table pointer register) is 7 bits wide. It holds IR6..IR0 once it
  has been loaded, and zero otherwise.

The CAR (control address register) forms the next micro-address. The CBR (control
buffer register) holds the address of the word being executed.

An instruction walks through the tables like this:

1. At the end of an instruction, or at reset, the CAR and VTPR are cleared. CAR = 0 is
   the start of the opcode fetch.
2. The last fetch word sets `/EO1`, which loads the CAR from the CSVT. VTPR is still 0,
   so the CSVT address is `{IR7, 0000000}`:
   * 0x00 holds the start of the direct operand fetch;
   * 0x80 holds the start of the indirect operand fetch.
3. The last operand-fetch word sets both `/EO2` and `/EO1`. `/EO2` loads VTPR from
   IR6..0 at the fall of phi1. Then `/EO1` loads the CAR from CSVT[opcode] at the fall of
   phi2. The CPU jumps straight to the opcode's execute sequence.
4. The execute sequence runs with the CAR counting. Its last word sets EOE, which clears
   the CAR and the VTPR.

Two other events also clear the CAR and the VTPR. A branch word whose condition fails
clears them, which abandons the instruction after one micro-cycle. Reset clears them as
well.

HALT uses the same mechanism in a different way. Its only word sets `/EO1`. VTPR still
holds 0x10, so the CAR reloads the HALT word again and again until reset.

Because opcodes 0x00 and 0x80 index the two operand-fetch vectors, they cannot be
instructions: executing one repeats its operand fetch indefinitely.

### Micro-instruction word

| Bits | Field | Meaning |
|---|---|---|
| 23..21 | A1..A3 | group A, encoded: 000 = PC + 1; 001..110 = test BGT, BLT, BEQ, BNE, BGE, BLE; 111 = none |
| 20..18 | B1..B3 | group B, encoded: 000 load IRL, 001 load IRH, 010 MARL, 011 MARM, 100 MARH, 101 MAR onto the address path, 110 load DRIN, 111 none |
| 17..15 | C1..C3 | group C, encoded: 000 load A, 001 load TR, 010 load DROUT, 011 load PC from MAR, 100 A onto the bus, 101 DROUT onto the data bus, 110 PC onto the address path, 111 none |
| 14 | Cn | ALU carry in, active low |
| 13 | M | ALU mode, 1 = logic |
| 12..9 | S0..S3 | ALU function select (S0 is the higher-numbered bit) |
| 8 | /CCL | load CC |
| 7 | /RL | load R |
| 6 | /REN | R onto the internal bus |
| 5 | /ADLAL | load the address latch |
| 4 | /DRINEN | DRIN onto the internal bus |
| 3 | /EO1 | load the CAR from the CSVT |
| 2 | /EO2 | load VTPR from IR6..0 |
| 1 | EOE | end of instruction: clear CAR and VTPR |
| 0 | R/W | 1 = memory write |

The three groups are encoded because the signals inside a group never act together.
This has consequences for the micro-program:

* "Enable A" and "load DROUT" are both in group C, so STA cannot move A to DROUT
  directly. It passes A through the ALU into R, then moves R to DROUT, then writes.
* "MAR enable" and "load DRIN" are both in group B, so the indirect operand fetch needs
  two words for its last step: one to load the address latch from the MAR, and one to
  read the operand.

The idle word is `FFFFFC`. The fetch words are `FB7FDC` (ADLA <- PC, DRIN <- memory),
`07FFEC` (IRH <- DRIN, PC + 1), `FB7FDC`, `03FFEC` (IRL <- DRIN, PC + 1) and `FFFFF4`
(end of fetch). These are the bit patterns of the original machine.

## Data Unit

* A 4-bit internal bus connects A, TR, R, IRH, IRL, MARL/M/H, DRIN and DROUT.
* Only R, DRIN and A ever drive the bus. An assertion checks that at most one of them
  drives it in any micro-cycle.
* The ALU always takes A and TR as inputs. R latches its result and CC latches its flags.
* A separate 12-bit path feeds the address latch ADLA from either the PC or the MAR.
* The PC can load from the MAR, which is how a taken branch jumps.
* The external address bus is ADLA, so the address holds steady between transfers.

The ALU follows the 74181 function table in full: 16 logic functions and 32 arithmetic
ones, selected by M, S3..S0 and Cn. The micro-program uses these settings:

| {Cn, M, S3..S0} | Function |
|---|---|
| 1 0 1001 | add |
| 0 0 0110 | subtract (and compare) |
| 1 0 1100 | A + A (ASLA) |
| 1 1 1011 | AND |
| 1 1 1110 | OR |
| 1 1 0000 | NOT A |
| 0 1 1010 | pass TR (LDA) |
| 1 1 1111 | pass A (STA) |
| 0 1 0000 | arithmetic shift right (ASRA) |

The C flag follows these rules:

* In arithmetic mode, C is the carry out XOR the carry in. That makes it the carry of an
  addition and the borrow of a subtraction.
* In logic mode with Cn = 1, C keeps its value.
* In logic mode with Cn = 0, C is cleared.

A 74181 cannot shift right. For ASRA this design reuses `M=1, Cn=0, S=0000`, a code the
real part treats the same as NOT A. Both the flag rules and the shift are this design's
own choices.

## Clocking and timing

The original machine used two non-overlapping clocks, phi1 and phi2. Here one master
clock `clk` drives every flip-flop. A two-bit counter splits each micro-cycle into four
master periods:

| Master period | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| phi1 / phi2 output | phi1 high | both low | phi2 high | both low |
| registers written at the end of the period | ADLA, PC + 1, VTPR | none | DRIN, A, TR, IR, MAR, DROUT, R, CC, PC load; CAR | CBR |

As a result:

* A word that loads the address latch and DRIN together reads the new address in the
  same micro-cycle.
* The CBR copies the CAR only at the rise of phi1, so the control-store output is steady
  for a whole micro-cycle.

phi1 and phi2 are also driven out on pins.

Memory must follow these rules:

* Reads are asynchronous. `data_in` must be valid by the end of period 2.
* A write is signalled by `rw = 1` with `data_oe = 1`. The memory should latch
  `data_out` at the edge that ends the phi2 pulse.

A full instruction takes between 9 and 16 micro-cycles (36 to 64 master clocks). The
instruction table lists each one.

## Where this design departs from, or fills in, the original

The following points follow the original description:

* the register set and bus structure;
* the 24-bit word layout;
* the codes that appear in its fetch table (A=000, B=000/001/110, C=110);
* the CAR and CBR edges;
* the two-ROM vectoring;
* the opcodes and branch conditions.

The following points are this design's own choices:

* **Micro-program.** The execute sequences, the remaining group codes and the
  micro-address layout are new. The original fetch table lists the IRL load before the
  IRH load. Here the first nybble goes to IRH, because the mode bit is the top bit of the
  first nybble. The encodings B=000 for IRL and B=001 for IRH are unchanged.
* **/EO1 and /EO2.** Here /EO1 loads the CAR and /EO2 loads the VTPR. This matches the
  original block diagram and fetch table, though its signal list pairs them the other
  way round.
* **Clocking.** The design uses one master clock with phase strobes instead of two clock
  domains. VTPR is loaded at the fall of phi1.
* **Flags and shift.** The C flag conventions and the ASRA shift are described in the
  Data Unit section.
* **Buses.** The data bus is split into `data_in`, `data_out` and `data_oe` instead of a
  tri-state port. The internal bus reads `1111` when nothing drives it.
* **Polarity and reset.** R/W = 1 means write. Reset clears every register and the CPU
  starts at address 000.
* **Observation ports.** The `dbg_*` outputs are new: A, PC, CC, IR, the micro-address
  and branch status.
* **Not built.** There is no power-on reset circuit; drive `rst` instead. The seventh
  branch instruction is also missing.

## Source files

| File | Contents |
|---|---|
| `rtl/iere4be_pkg.sv` | widths, micro-instruction struct, group encodings, opcodes, micro-addresses, ALU codes |
| `rtl/iere4be_cpu.sv` | top level |
| `rtl/clock_gen.sv` | phi1/phi2 and edge strobes |
| `rtl/data_unit.sv` | registers, internal bus, address path |
| `rtl/alu181.sv` | 74181-style ALU and flag logic |
| `rtl/program_counter.sv` | 12-bit PC |
| `rtl/control_unit.sv` | CAR, CBR, VTPR, conditional and reset logic |
| `rtl/control_store.sv` | the micro-program ROM |
| `rtl/csvt.sv` | the vector table ROM |
| `rtl/micro_decoder.sv` | decoding of groups A/B/C and the strobe bits |
| `rtl/branch_logic.sv` | branch condition evaluation |

Each module has a self-checking testbench `tb/tb_<module>.sv`. `tb/tb_iere4be_cpu.sv`
runs the whole CPU with a memory model and compares it with an instruction-level model
of the instruction set. It checks:

* A, C, Z and PC after every instruction;
* the clock count of every instruction;
* the full memory at HALT.

It runs the example encodings of `LDA`, a directed program that uses every opcode and
takes and falls through every branch, and six random programs.

## Simulating

Any testbench runs with Verilator 5 in the same way. For the whole CPU:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/iere4be_pkg.sv tb/tb_iere4be_cpu.sv --top-module tb_iere4be_cpu
./obj_dir/Vtb_iere4be_cpu
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. The CPU test takes well
under a second. To run your own program, copy `directed_program()` in the CPU testbench.
Its assembler tasks `imm`, `ind` and `inh` write instructions into the memory model.

## Changing the instruction set

To add an instruction:

1. Write its execute words at a free address in `control_store.sv`. Use the helper
   functions there, and end the sequence with a word that sets `eoe`.
2. Point its opcode at them in `csvt.sv`. Bit 7 of the opcode decides which operand
   fetch runs before the sequence.

The CPU testbench's reference model (`ref_step`) must learn the new opcode too.
