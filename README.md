# Low-power multi-cycle control unit for an RV32I-subset core

This is a small RISC-V processor core built around a finite-state control unit.
The core executes 13 RV32I instructions, one at a time, in 3 or 4 clock cycles each:

| group  | instructions                   |
|--------|--------------------------------|
| R-type | `add`, `sub`, `and`, `or`      |
| I-type | `addi`, `slli`, `srli`, `lw`   |
| S-type | `sw`                           |
| U-type | `lui`, `auipc`                 |
| J-type | `jal`                          |
| B-type | `beq`                          |

The control unit is the centre of the design. It is a Moore machine with three parts:

- next-state logic;
- a 5-bit state register that loads on the **falling** clock edge;
- an output decoder that drives 13 control lines into a conventional datapath.

Power is saved in two ways:

- **Clock gating.** Every datapath register gets a clock only in the cycles where its control line loads it.
- **Quiet buses.** The immediate and instruction buses are held at zero while their enables are off.

The control table is the one published for the original design, reproduced bit for bit. The datapath around it follows that design's block diagram, but many of its details are this implementation's own choices. The departures are listed in a section of their own below.

## Control sequence

Every instruction starts in FETCH and ends back in FETCH.

```
reset -> S0 INIT -> S1 FETCH (IR <- IM[PC]) -> S2 DECODE -> execute state -> S1 ...

  S3  sw     M[rs1+imm] <- rs2, PC += 4
  S4  lw     (read issued)             -> S17 NOP: rd <- M[rs1+imm], PC += 4
  S5  add    S6 sub    S7 or    S8 and          rd <- rs1 op rs2,  PC += 4
  S9  addi   S10 slli  S11 srli                 rd <- rs1 op imm,  PC += 4
  S12 lui    rd <- imm << 12                                        PC += 4
  S13 auipc  rd <- PC + (imm << 12)                                 PC += 4
  S14 jal    rd <- PC + 4, PC <- PC + offset
  S15 beq    compare rs1, rs2          -> S16: taken (PC += offset) or not (PC += 4)
```

Cycle counts follow from this sequence:

- 3 cycles for most instructions: FETCH, DECODE and one execute state.
- 4 cycles for `lw` (S4, S17) and `beq` (S15, S16).

A state's code is its number, so S17 is `5'd17`.

DECODE picks the execute state from the instruction fields:

- the opcode;
- funct3;
- funct7, used to tell `add` from `sub`; for `slli`/`srli` only funct7 bits 6:1 are checked.

Any other instruction word sends DECODE straight back to FETCH with the PC unchanged. The core then re-fetches the same word for ever. An all-zero word therefore works as a halt, and the testbenches end their programs with one.

## The 13 control lines and the combined value

| line         | meaning                                                  |
|--------------|----------------------------------------------------------|
| `RFwEn`      | register-file write enable, **active low**               |
| `IMMwEn`     | immediate-generator enable, **active low**               |
| `IMwEn`      | instruction-memory enable, **active low**                |
| `Mread`      | data-memory read                                          |
| `Mwrite`     | data-memory write                                         |
| `LdIR`       | load instruction register                                 |
| `LdPC`       | load PC                                                   |
| `PCSel`      | next PC: 0 = PC + 4, 1 = ALU result                       |
| `RFSel[1:0]` | write-back: 00 = PC + 4, 01 = ALU, 10 = memory read data  |
| `ASel`       | ALU operand A: 1 = rs1, 0 = PC                            |
| `BSel`       | ALU operand B: 1 = immediate, 0 = rs2                     |
| `ALUOp[3:0]` | 0000 add, 0001 sub, 0010 or, 0011 and, 0100 sll, 0101 srl, 0110 pass B |
| `Br_control` | capture the comparator result                             |

The 17 bits, packed in the order of this table (`RFwEn` in bit 16, `Br_control` in bit 0) and zero-extended to 20 bits, form the *combined value* `cv`. The control unit outputs `cv`, and its current state, as observation ports. Each state has its own `cv`, which makes a simulation trace easy to read:

| state | cv      | state | cv      | state     | cv      |
|-------|---------|-------|---------|-----------|---------|
| S0    | `1C0D0` | S6    | `08CC2` | S12       | `00CAC` |
| S1    | `188D0` | S7    | `08CC4` | S13       | `00CA0` |
| S2    | `14000` | S8    | `08CC6` | S14       | `02E20` |
| S3    | `11D60` | S9    | `00CE0` | S15       | `000C1` |
| S4    | `02160` | S10   | `00CE8` | S16 not taken | `1CCC0` |
| S5    | `08CC0` | S11   | `00CEA` | S16 taken | `02E21` |
|       |         |       |         | S17       | `02D60` |

## Two clock edges

The control state changes on the falling edge of `clk`. The outputs are decoded from the state, so they settle during the low phase. Every datapath register (PC, IR, register file, data memory, the BrEq flip-flop) loads on the rising edge in the middle of the state.

Each state therefore lasts exactly one clock period, and its datapath actions happen at its rising edge. In an `add`, for example:

- the sum is written into `rd` at the S5 rising edge;
- PC moves to PC + 4 at the same edge;
- the next falling edge moves the control unit to FETCH.

Several rows also assert `LdIR` with the instruction memory enabled. Those reloads capture the same word again, because the PC changes at the same edge.

## Loads take two states

The data memory has a registered read port.

- **S4:** the read is issued, and the word appears on `ReadData` after the S4 rising edge. S4 also writes `ReadData` into `rd`, but that is still the previous read's value.
- **S17 ("NOP"):** keeps `Mread` and the register-file write enabled, so its rising edge writes the correct word. PC advances in S17.

This also works when `rd` equals `rs1`. The stale S4 write changes the address used in S17, but the data written in S17 was captured in S4.

## Branches, and their register-file side effect

`beq` takes two states:

- **S15 (compare):** `Br_control` is 1. At its rising edge the comparator stores `rs1 == rs2` in a flip-flop, which is the `BrEq` seen by the control unit.
- **S16:** `BrEq` selects one of two output rows.
  - Not taken: PC <- PC + 4. All enables are off.
  - Taken: PC <- PC + offset, through the ALU with operand A = PC and operand B = the B-immediate.

S16 is one state with two rows, and `Br_control` itself differs between them. A purely combinational `BrEq` gated by `Br_control` would loop through the decoder, so the comparator result is registered.

**Side effect.** The published rows for S15 and for a taken S16 have `RFwEn = 0`, so they write the register file. The destination is the register named by instruction bits 11:7, which in a B-type instruction hold offset bits 4:1 and 11. The effect is:

- S15 writes `rs1 + rs2` into that register (RFSel = ALU, ALU = rs1 + rs2);
- a taken S16 then writes PC + 4 there (RFSel = 00).

This RTL keeps the rows exactly as published, side effect included. The side effect vanishes when those bits name `x0`, that is when offset bits 4:1 and 11 are zero (non-negative offsets that are multiples of 32 and below 2048). For a clean `beq`, change the `RFwEn` column of rows `S_BEQ_CK` and `S_BEQ_EX` (taken) to 1 in `rtl/cu_control_signals.sv`. The combined values of those states then become `100C1` and `12E21`.

Other published entries look unusual but are harmless, so they are kept: `jal` and the taken branch assert `Mread`, which only refreshes `ReadData`.

## Clock gating

`clock_gate` is a latch-based gate:

- a latch, transparent while `clk` is low, holds the enable;
- the latch output is ANDed with `clk`.

The control lines change just after the falling edge, inside the transparent phase, so no glitch or shortened pulse can reach the gated clock.

| register           | enable of its clock gate     |
|--------------------|------------------------------|
| PC                 | `LdPC`                       |
| IR                 | `LdIR`                       |
| register file      | `!RFwEn`                     |
| data memory        | `Mread` or `Mwrite`          |
| BrEq flip-flop     | `Br_control`                 |

Over the random test programs, the PC clock is stopped in about 70 % of cycles and the data-memory clock in about 90 %.

The control unit's own state register changes in every cycle, since no state follows itself, so it is not gated. Lint tools report the latch in `clock_gate`; it is intended.

## Datapath

```
           +--> +4 ----------------------------+----------------> WB 00
           |                                    |
 PC <- mux(PCSel: 0 = PC+4, 1 = ALU) <--+       |
 |                                      |       |
 +--> instruction memory (256 x 8) --> IR --> register file (32 x 32) --> rs1, rs2
 |                                      |                     ^
 |                                      +--> immediate gen     |  WB mux (RFSel)
 |                                                             |
 A = ASel ? rs1 : PC ;  B = BSel ? imm : rs2  --> ALU --+--> data memory address --> ReadData -> WB 10
                                                        +--> WB 01, next PC
 rs1 == rs2 --(Br_control)--> BrEq flip-flop --> control unit
 rs2 --> data memory write data
```

- **Memories.** Both memories are 256 bytes, read as little-endian 32-bit words at any byte address, with addresses wrapping modulo 256. The instruction memory reads combinationally, so IR captures `IM[PC]` at the FETCH rising edge, and it outputs zero while `IMwEn = 1`. It has a word-wide load port (`load_we`, `load_addr`, `load_data`) for filling the program while `rst` is high.
- **Register file.** `x0` reads as zero and ignores writes. Reset clears all 32 registers.
- **Immediate generator.** Builds the I, S, B, U and J immediates of RV32I. Its output is zero while `IMMwEn = 1`.
- **Reset.** `rst` is active high and asynchronous. It puts the control unit in INIT and clears PC, IR, BrEq and the register file. The data memory is not cleared.

## Where this departs from, or adds to, the published design

**Taken from the published design:**
- the state sequence and the control rows;
- the instruction encodings;
- the falling-edge state register;
- the active-low enables;
- the memory and register-file sizes;
- the mux input numbering;
- the use of clock gating.

**Own choices of this design:**
- `auipc`: its printed combined value (`01CA0`) disagrees with its printed row bits. The row bits were followed (`00CA0`), because the printed value would also assert `Mwrite`.
- DECODE drives `14000`. The table leaves that state as don't-care, and `14000` is what the original simulation traces show.
- `BrEq` is registered, and it selects the S16 row in the output decoder. The original diagram draws it into the next-state logic.
- Clock gates sit on the datapath registers. The original inserted clock gating at synthesis, on the control unit.
- The timing of the memories: combinational instruction read, registered data read.
- Little-endian byte order and address wrap-around.
- `x0` is hard-wired to zero, and reset clears the registers.
- The enables force the immediate and instruction buses to zero when off.
- Undecoded words are treated as a halt.
- ALU code `1000`, used in INIT and FETCH, outputs zero.
- The instruction-memory load port.

**Not reproducible in RTL:** the timing (1.5 ns period), power (before and after gating) and area figures of the original come from 32 nm synthesis and layout.

## Files

| file | content |
|------|---------|
| `rtl/riscv_cu_pkg.sv` | state enum, opcodes, ALU codes, the `ctrl_t` struct of the 13 lines |
| `rtl/riscv_core.sv` | top: control unit plus datapath |
| `rtl/control_unit.sv` | the control unit: `cu_next_state`, `cu_state_reg`, `cu_control_signals` |
| `rtl/riscv_datapath.sv` | datapath: `program_counter`, `instr_mem`, `instr_reg`, `reg_file`, `imm_gen`, `branch_comp`, `alu`, `data_mem` |
| `rtl/clock_gate.sv` | latch-based clock gate used by the datapath registers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a watchdog ends a stuck run. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/riscv_cu_pkg.sv tb/tb_riscv_core.sv --top-module tb_riscv_core -o sim
./obj_dir/sim
```

`tb_riscv_core` runs the core at its default sizes:

- the five instructions of the original simulation traces;
- a directed program covering all 13 instructions, with both branch outcomes;
- twelve random programs of the 13 instructions.

An instruction-level reference model in the testbench executes the same programs, including the branch side effect described above. Each time the control unit returns to FETCH, the testbench compares the whole register file and the PC with the model and checks the instruction's cycle count. It also checks the combined value against the table in every cycle, and compares the data memory at the end.

It counts the mechanisms and fails if any of them never occurs:

- every state S0 to S17;
- taken and not-taken branches;
- the extra load cycle;
- the halt;
- gated cycles of each clock gate.

A typical run retires about 700 instructions in about 2250 cycles.

The other testbenches check each module against a reference written in the testbench:

- `tb_control_unit` checks the full state and `cv` sequence of every instruction.
- `tb_riscv_datapath` drives the datapath from the table's rows, with no control unit.
- The remaining testbenches each check one module on its own.
