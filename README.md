# TRISC — a tiny 4-bit accumulator computer

TRISC ("Tiny Reduced Instruction Set Computer") is a teaching processor small enough to follow
signal by signal. It has a 4-bit accumulator, a 4-bit program counter, a 16-word by 8-bit memory
and six instructions. A 20-state controller executes each instruction as a short sequence of
register transfers. All of its internal control lines, C0 to C14, are visible on LEDs. The design
targets a small FPGA development board. Programs are keyed into memory with switches and a push
button, and six seven-segment displays show the program counter, the memory address, the memory
output and the memory input (which carries the accumulator).

This repository holds synthesizable SystemVerilog for the whole machine and its board interface,
with a self-checking testbench for every block.

## Instruction set

An instruction is one 8-bit memory word, `{opcode[7:4], address[3:0]}`.

| Mnemonic | Opcode | Effect                                   | Clocks |
|----------|--------|------------------------------------------|--------|
| LDA a    | 0000   | ACC ← mem[a][3:0]                        | 8      |
| STA a    | 0001   | mem[a] ← {0000, ACC}                     | 7      |
| ADD a    | 0010   | ACC ← ACC + mem[a][3:0] (mod 16)         | 9      |
| INC      | 0110   | ACC ← ACC + 1 (mod 16)                   | 5      |
| CLR      | 0111   | ACC ← 0                                  | 5      |
| JMP a    | 1000   | PC ← a                                   | 5      |

The clock count includes the four-clock fetch. INC and CLR ignore their address field.
The instruction decoder also recognises SUB (0011), XOR (0100), JPN (1100) and HLT (1001), and the
ALU can subtract, AND and XOR. No controller sequence uses any of them. Fetching one of these
opcodes, or any other undefined code, halts the machine (see *Halting*).

There are no condition flags. The ALU computes overflow and carry-out, but nothing stores them.

## Datapath and buses

```
            8-bit MDI bus  ({4'b0, ACC})  ───────────────► RAM data in
            8-bit MDO bus  (RAM output)   ──► IR (MDO[7:4]), PC load (MDO[3:0]),
                                              ACC load (MDO[3:0]), ALU B (MDO[3:0]),
                                              RAM address when C3 = 0 (MDO[3:0])
            4-bit address bus (PC)        ──► RAM address when C3 = 1

     ACC ──► ALU A          ALU R ──► BR ──► ACC (when C10 = 1)
```

* **RAM** (`ram16x8`) is 16 × 8 and fully synchronous. The address and the output are both
  registered, and the RAM advances only on clock edges where C4 is high. A read therefore needs
  two C4 clocks: the first captures the address and the second puts the word on MDO. A write
  (C4 and C5 together) takes effect on the first C4 clock. This is why every memory access in
  the state sequence below is two consecutive C4 states.
* **Address mux**: the RAM address is the PC when C3 = 1 (instruction fetch) and the address
  field of the fetched instruction, still on MDO[3:0], when C3 = 0 (operand access).
* **PC** (`up_counter`): clear (C0), load from MDO[3:0] (C1) and increment (C2), in that order of
  priority.
* **ACC** (`accumulator`): a two-input mux feeding the same kind of counter. It can clear (C8),
  load (C11) and increment (C9). C10 picks the source: 0 takes MDO[3:0], 1 takes the ALU result
  through the BR.
* **ALU** (`alu`, `ripple_carry_adder`, `full_adder`): a 4-bit ripple-carry adder/subtractor
  plus AND and XOR. Its select inputs are S0 = C12 and S1 = C13. {C12, C13} = 00 adds, 10
  subtracts, 01 ANDs and 11 XORs. For AND and XOR the overflow and carry outputs are 0.
* **BR** and **IR** (`pipo_register`): 4-bit registers. BR is loaded by C14 and IR by C7, and
  both are cleared by Start/Stop. Their outputs are *write-through*, explained below.

## The controller

`controller` is a Moore machine with one clock per state. A datapath register acts on the rising
edge that *ends* a state in which its control signal is high.

| State | Signals      | Action at the end of the state                                 |
|-------|--------------|----------------------------------------------------------------|
| A     | C0           | PC ← 0 (entered while Start/Stop is low)                       |
| B     | C3           | address mux on PC                                              |
| C     | C3 C4        | RAM captures the PC as address                                 |
| D     | C3 C4        | MDO ← mem[PC]                                                  |
| E     | C2 C3 C7     | IR ← MDO[7:4], PC ← PC + 1; branch on the opcode               |
| F     | C9           | INC: ACC ← ACC + 1                                             |
| G     | C8           | CLR: ACC ← 0                                                   |
| H     | C1           | JMP: PC ← MDO[3:0]                                             |
| I J K | –, C4, C4    | LDA: address mux on MDO[3:0]; RAM captures it; MDO ← mem[a]     |
| L     | C11          | ACC ← MDO[3:0]                                                 |
| M N O | –, C4 C5, C4 C5 | STA: address on MDO[3:0]; write {0, ACC}; second RAM clock  |
| P Q R | –, C4, C4    | ADD: as LDA, MDO ← mem[a]                                      |
| S     | –            | ALU settles on ACC + MDO[3:0]                                  |
| T     | C10 C11 C14  | BR ← ALU result and ACC ← BR, in the same clock                |

F, G, H, L, O and T return to B. The states are encoded 0 (A) to 19 (T). The encodings are in
`trisc_pkg::state_e`.

### Using a value in the state that loads it

Two states need a register's new value during the clock that loads it:

* In **E** the machine loads the opcode into the IR, and the next-state choice depends on that
  same opcode.
* In **T** the BR takes the ALU result, and the ACC loads from the BR.

With ordinary edge-triggered registers, E would branch on the previous instruction and T would
put the previous sum into the ACC. BR and IR are therefore write-through registers: while their
load signal is high, their output already shows their input. The stored copy is taken at the end
of the state, so both registers hold their value once the load signal drops. The PC and the ACC
are plain edge-triggered registers. This keeps the loop ACC → ALU → BR → ACC broken by a clock
edge.

A linter that treats the control-word struct as a single signal reports a combinational loop
IR → decoder → control word → IR. It is a false alarm. The IR's write-through is selected by C7,
which depends only on the state. The decoder reaches only C2 (in state E) and the next state.

### Halting

An opcode with no execute sequence leaves the machine in state E. C2 is then held low, so the
PC keeps the address of the halting instruction, and the controller's `halted` output is high.
Only Start/Stop low leaves this state.

## Memory loading and the board interface

`trisc_top` is the whole machine plus its board connections.

| Port               | Use                                                                        |
|--------------------|----------------------------------------------------------------------------|
| `sys_clock`        | the single clock; one controller state per rising edge                     |
| `start_stop`       | low: controller held in A, PC/ACC/IR/BR cleared; high: run                 |
| `mode`             | 0 run, 1 program load                                                      |
| `clock_in`         | load key, one-clock strobe synchronous to `sys_clock`                      |
| `clear_addr_gen_n` | low resets the load address to 0                                           |
| `rw_n`             | load key, low = write                                                      |
| `data_in[7:0]`     | word to store                                                              |
| `cled[14:0]`       | `cled[k]` = Ck; bit 6 is always 0 (there is no C6)                          |
| `hex5_out`..`hex0_out` | PC, RAM address, MDO[7:4], MDO[3:0], RAM data in [7:4], [3:0]          |

Segment outputs are `{g,f,e,d,c,b,a}`. They are active low by default (`SEG_ACTIVE_LOW`).

In load mode (`mode = 1`, with `start_stop` held low), the RAM takes its address from
`address_generator`, its data from `data_in`, its clock enable from `clock_in` and its write
enable from `~rw_n`. To store one word:

1. Press the load key with `rw_n` low. This writes the word.
2. Press it again with `rw_n` high. The RAM output register shows the word on hex3/hex2, and the
   address generator moves to the next address.

The address generator is a toggle flip-flop followed by a 4-bit counter, so it advances on every
second press.

In run mode, hex1/hex0 show MDI, so hex0 is the accumulator and hex5 the program counter.

## Example program

The demonstration program, with the accumulator value expected after the instruction at each
address:

| Addr | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  | 8  | 9  | A  | B  | C  | D  | E  | F  |
|------|----|----|----|----|----|----|----|----|----|----|----|----|----|----|----|----|
| Word | 0F | 61 | 62 | 1E | 74 | 0E | 66 | 89 | 88 | 69 | 2E | 7B | 6C | 88 | EE | FF |
| ACC  | F  | 0  | 1  | 1  | 0  | 1  | 2  | 2  | 1  | 3  | 4  | 0  | 1  | 1  | –  | –  |

The program runs 0 to 7, jumps over 8 to 9, runs to D, then jumps to 8, which jumps to itself.
Address 8 is therefore the last to show its value. Addresses E and F are data: STA stores 01 at E,
and F supplies the F that the first instruction loads. `tb_trisc_top` loads this program through
the switch interface and runs it. It checks the PC, the accumulator and the clock count of every
instruction.

## Departures from the original design

* **One clock.** The original clocks each register directly with its control line, and clocks the
  RAM with `SysClock AND C4`. Here every control signal is a clock enable of `sys_clock`.
* **Write-through BR and IR**, described above. The original registers take their input while
  the control line is active, which gives the same behaviour.
* **Control polarities.** The signal table in the source gives C3 = 0 as "PC" and C10 = 0 as
  "ALU". The state sequence and the original wiring only work the other way round, so this RTL
  uses C3 = 1 for the PC and C10 = 1 for the ALU/BR.
* **States G and L.** The source's state table lists the same signals for G as for F (C9), and
  C12 for L. The state diagram, which the example program needs, gives C8 for G and C11 for L.
  This RTL follows the state diagram.
* **Halting.** In the original, an undefined opcode leaves the next-state logic unassigned, so the
  machine stays in E. This RTL keeps that, and also holds C2 low there.
* **Reset.** `start_stop` also clears the PC and the ACC directly. The original clears only the
  IR and BR, and clears the PC through state A.
* **MDI[7:4]** is driven with 0. The original leaves it undriven, so STA stores `{0, ACC}`.
* **Decoder codes JPN = 1100 and HLT = 1001** come from a partly illegible decoder table. No code
  decodes to JPZ. None of these opcodes is executed.
* **Not built:** a flag register (Z, N, V, C, loaded by a C15). It is drawn in one diagram of the
  source but belongs to no instruction of this machine.
* **RAM read-during-write:** in state O, the second STA state, the RAM output register reads back
  the word just written. The original memory's behaviour here is not known, and nothing uses MDO
  before the next fetch.

## Files

| File                         | Contents                                              |
|------------------------------|-------------------------------------------------------|
| `rtl/trisc_pkg.sv`           | opcodes, decoder lines, control word, state encoding  |
| `rtl/trisc_top.sv`           | the machine and board interface (top)                 |
| `rtl/control_unit.sv`        | decoder + controller                                  |
| `rtl/controller.sv`          | the 20-state FSM, with assertions on the control word |
| `rtl/instruction_decoder.sv` | 4-to-11 opcode decoder                                |
| `rtl/ram16x8.sv`             | 16 × 8 synchronous RAM                                |
| `rtl/up_counter.sv`          | clear/load/increment counter (PC)                     |
| `rtl/accumulator.sv`         | ACC: source mux + counter                             |
| `rtl/pipo_register.sv`       | write-through register (BR, IR)                       |
| `rtl/alu.sv`, `rtl/ripple_carry_adder.sv`, `rtl/full_adder.sv` | ALU           |
| `rtl/address_generator.sv`   | load-mode address counter                             |
| `rtl/seven_seg_hex.sv`       | hex to seven-segment decoder                          |
| `tb/tb_<module>.sv`          | one self-checking testbench per module                |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. To build and run one, for
example the full machine:

```
verilator --binary --timing --assert -Irtl -Itb rtl/trisc_pkg.sv tb/tb_trisc_top.sv \
          --top-module tb_trisc_top
./obj_dir/Vtb_trisc_top
```

Replace `trisc_top` with any other module name to run its testbench. Verilator finds the
sub-modules in `rtl/` by name.

`tb_trisc_top` runs at the default parameters and takes under a second. In order, it:

1. loads and runs the example program;
2. loads and runs six random programs of the six executed instructions, 60 instructions each,
   against an instruction-level reference model;
3. reads back memory after each run;
4. runs a program that halts on SUB;
5. leaves the halt with Start/Stop.

It counts every mechanism (each instruction, accumulator wrap-around, load-mode writes and
read-backs, halt, stop/reset) and fails if any never occurs.

The block testbenches are exhaustive for the adder, ALU, decoder and display decoder. They run
random sequences against reference models for the counters, registers, RAM and address
generator, and check state-by-state control words for the controller.
