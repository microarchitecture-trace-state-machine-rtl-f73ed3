# A multicycle AVR-subset processor driven by a state machine

This processor runs a small subset of the 8-bit AVR instruction set. It
breaks every instruction into a sequence of single register transfers, one
per clock cycle. The datapath has no pipeline and no shared buses. It is a
collection of small named registers (PC, INST, REG, REG2, OFF, VAL1, VAL2,
ADDR, SREG, VAL), each with a `din`/`dout`/`we` interface and an input
multiplexer. Around them sit a program memory, a 32 x 8 register file, an
add/subtract ALU and a data memory. A state machine controller owns all the
write enables and multiplexer selects. Each of its states names one transfer,
for example `VAL = INST[11:8],INST[3:0]`. An instruction is a walk from the
fetch state back to it.

The point of the design is that execution can be traced exactly. Knowing the
state sequence tells you the cycle count of every instruction. Adding an
instruction means adding a path through the state graph, plus at most a new
register input, multiplexer leg or state. Every block only reacts to its own
inputs, so none of them needs to know what the others are doing.

## Instructions and cycle counts

| instruction | encoding (AVR) | cycles | states visited |
|---|---|---|---|
| `ldi Rd,K` (r16..r31) | `1110 KKKK dddd KKKK` | 5 | 00000 00001 00101 10010 10011 |
| `subi Rd,K` | `0101 KKKK dddd KKKK` | 8 | 00000 00001 00111 01111 01100 01101 10010 10011 |
| `cpi Rd,K` | `0011 KKKK dddd KKKK` | 7 | 00000 00001 00111 01111 01100 01101 10011 |
| `ld Rd,X` | `1001 000d dddd 1100` | 6 | 00000 00010 01001 10000 10010 10011 |
| `st X,Rr` | `1001 001r rrrr 1100` | 6 | 00000 00010 01001 00110 10001 10011 |
| `add Rd,Rr` | `0000 11rd dddd rrrr` | 9 | 00000 00010 00111 01010 01000 01011 01101 10010 10011 |
| `sub Rd,Rr` | `0001 10rd dddd rrrr` | 9 | 00000 00010 00111 01010 01000 01100 01101 10010 10011 |
| `cp Rd,Rr` | `0001 01rd dddd rrrr` | 8 | 00000 00010 00111 01010 01000 01100 01101 10011 |
| `breq k` / `brne` / `brlo` / `brsh` | `1111 0Skk kkkk k00F` | 5 | 00000 00011 01110 10100 10011 |
| `rjmp k` | `1100 kkkk kkkk kkkk` | 5 | 00000 00100 01110 10100 10011 |
| `inc Rd` (extension) | `1001 010d dddd 0011` | 7 | 00000 00010 00111 10101 10110 10010 10011 |
| `regjump Rr` (extension) | `1111 11r0 0000 rrrr` | 6 | 00000 01010 01000 10111 10100 10011 |
| any other word | | 2 | 00000 10011 (skipped) |

The ten base instructions take exactly the cycle counts of the reference
design's CPI table. A program's run time is therefore the sum over
instructions of CPI times count, times the clock period.

In the branch encoding, `S` is the sense bit INST[10] (0 = branch if the flag
is set, 1 = branch if it is clear) and `F` is INST[0], which picks the flag
(0 = C, 1 = Z). That gives breq = (0,Z), brne = (1,Z), brlo = (0,C) and
brsh = (1,C). `regjump` sets PC = PC + Rr + 1. It is not an AVR instruction,
and its opcode was chosen for this design.

## The states

Each state performs one transfer. All control signals not listed are 0.

| state | transfer | controls |
|---|---|---|
| 00000 | INST = PM[PC] | INST_we |
| 00001 | REG = 1,INST[7:4] | REG_we, REG_sel=0 |
| 00010 | REG = INST[8:4] | REG_we, REG_sel=1 |
| 00011 | OFF = branch taken ? k : 0 | OFF_we, OFF_sel=1 |
| 00100 | OFF = INST[11:0] | OFF_we, OFF_sel=0 |
| 00101 | VAL = INST[11:8],INST[3:0] | VAL_we, VAL_sel=3 |
| 00110 | VAL = RF[REG] | VAL_we, VAL_sel=2, RF_sel=0 |
| 00111 | VAL1 = RF[REG] | VAL1_we, RF_sel=0 |
| 01000 | VAL2 = RF[REG2] | VAL2_we, VAL2_sel=0, RF_sel=1 |
| 01001 | ADDR = X (r27:r26) | ADDR_we |
| 01010 | REG2 = INST[9],INST[3:0] | REG2_we |
| 01011 | VAL = VAL1 + VAL2 | VAL_we, VAL_sel=1, A_sel=1, B_sel=0, ALU_op=0 |
| 01100 | VAL = VAL1 - VAL2 | VAL_we, VAL_sel=1, A_sel=1, B_sel=0, ALU_op=1 |
| 01101 | SREG = flags of the operation | SREG_we (ALU held on VAL1 op VAL2) |
| 01110 | VAL = PC + OFF | VAL_we, VAL_sel=1, A_sel=0, B_sel=1, ALU_op=0 |
| 01111 | VAL2 = INST[11:8],INST[3:0] | VAL2_we, VAL2_sel=1 |
| 10000 | VAL = RAM[ADDR] | VAL_we, VAL_sel=0 |
| 10001 | RAM[ADDR] = VAL | RAM_we |
| 10010 | RF[REG] = VAL | RF_we, RF_sel=0 |
| 10011 | PC = PC + 1 | PC_we, PC_sel=0 |
| 10100 | PC = VAL | PC_we, PC_sel=1 |
| 10101 | OFF = 1 (inc) | OFF_we, OFF_sel=2 |
| 10110 | VAL = VAL1 + OFF (inc) | VAL_we, VAL_sel=1, A_sel=1, B_sel=1, ALU_op=0 |
| 10111 | VAL = PC + VAL2 (regjump) | VAL_we, VAL_sel=1, A_sel=0, B_sel=0, ALU_op=0 |

The state numbers of the base machine follow no pattern. They were assigned
arbitrarily and are kept as they are. States 10101 to 10111 belong to the
extensions, and their numbers were chosen for this design.

### Points that are easy to get wrong

- **Deciding in the fetch state.** The controller decodes INST, but in state
  00000 INST is only being loaded. To pick the next state there, the
  controller decodes the program-memory output instead (`fetch_word`). That
  is the word INST will hold one cycle later.
- **The flag update is its own cycle.** State 01101 writes SREG one cycle
  after the ALU result went into VAL. The ALU is combinational and has no
  flag register of its own. So in 01101 the controller keeps the ALU on the
  same operands and operation (VAL1, VAL2, add for `add` and subtract
  otherwise), and SREG takes the flags of the result just computed.
- **Branches always take five cycles.** A conditional branch never changes
  the state sequence. Instead, a small multiplexer in front of OFF loads
  either the offset k or 0, selected by the flag test in `branch_logic`.
  Then `VAL = PC + OFF`, `PC = VAL` and `PC = PC + 1` run either way. A
  taken branch lands on PC + k + 1, and a branch not taken lands on PC + 1.
- **PC-relative arithmetic is 8 bits.** PC is loaded from the 8-bit VAL
  register, so PC, and with it the 256-word program memory, is 8 bits wide.
  OFF holds 12 bits, but the ALU adds only its low byte. Jumps therefore
  wrap modulo 256. A negative `rjmp` offset works because its low byte is
  the same modulo 256.
- **Flags.** Only C (bit 0) and Z (bit 1) of SREG are computed, at their AVR
  positions. After a subtraction C is the borrow, as on AVR, so `brlo`
  after `cp` means "unsigned lower". `inc` leaves SREG alone. The other SREG
  bits pass through the ALU unchanged.

## Datapath

Each register is shown with the sources its input multiplexer selects from.

```
PC    <- PC + 1 | VAL                                   (PC_sel 0 | 1)
INST  <- PM[PC]
REG   <- 1,INST[7:4] | INST[8:4]                        (REG_sel 0 | 1)
REG2  <- INST[9],INST[3:0]
OFF   <- INST[11:0] | (taken ? sext(INST[9:3]) : 0) | 1 (OFF_sel 0 | 1 | 2)
RF    addr <- REG | REG2 (RF_sel), din <- VAL, x = {r27, r26}
VAL1  <- RF dout
VAL2  <- RF dout | INST[11:8],INST[3:0]                 (VAL2_sel 0 | 1)
ALU   A <- PC | VAL1 (A_sel), B <- VAL2 | OFF (B_sel), op 0 add / 1 sub
SREG  <- ALU Sreg_out (ALU's sregin is SREG)
ADDR  <- RF x
RAM   addr <- ADDR (low byte), din <- VAL
VAL   <- RAM dout | ALU Q | RF dout | INST[11:8],INST[3:0]   (VAL_sel 0..3)
```

The program memory, the register file and the data memory all read
combinationally and write on the rising clock edge. Every register written
in a state shows its new value in the next state.

## Files

| file | contents |
|---|---|
| `rtl/mcpu_pkg.sv` | state enum, control-signal struct `ctrl_t`, select encodings, instruction decoder `decode_op` |
| `rtl/mcpu.sv` | top: datapath wiring and multiplexers, instantiates everything below |
| `rtl/mcpu_ctrl.sv` | state machine controller |
| `rtl/aux_reg.sv` | write-enabled register used for all ten auxiliary registers |
| `rtl/prog_mem.sv` | program memory, 256 x 16, with a load port |
| `rtl/reg_file.sv` | 32 x 8 register file with X-pointer output |
| `rtl/alu.sv` | add/subtract with C and Z flags |
| `rtl/data_ram.sv` | data memory, 256 x 8 |
| `rtl/branch_logic.sv` | branch condition and offset multiplexer in front of OFF |
| `tb/*_tb.sv` | one self-checking testbench per module |

Top-level ports of `mcpu`:

- `clk`: the clock.
- `rst_n`: synchronous, active low. It clears PC, the auxiliary registers and
  the register file, and puts the controller in state 00000. The two
  memories are not cleared.
- `pm_we`, `pm_waddr`, `pm_wdata`: write program words, for example while
  `rst_n` is low.
- `state`, `pc`, `inst`: show the controller state and the PC and INST
  registers.

Parameters: `PM_AW` = 8, `RAM_AW` = 8 and `NREG` = 32. Only these defaults
have been simulated. The data width (8) and the instruction width (16) are
fixed in the package.

## Where this design goes beyond, or departs from, the reference

The reference gives the datapath drawing, the state diagram, cycle-accurate
traces of `ldi` and `add`, the CPI table and the sequences for the added
instructions. This design also fixes the following points:

- **Multiplexer numbering.** Where the traces print a select value, it is
  followed. The rest was chosen here: VAL_sel 0 = RAM and 2 = RF, the
  OFF_sel and VAL2_sel immediates, and PC_sel 1 = VAL.
- **RAM data source.** The wire into the RAM's data input cannot be traced in
  the drawing. `st` moves the register into VAL (state 00110), and RAM writes
  VAL.
- **Which states are which.** Only some states are named in the reference;
  the others were read from the instruction lists on the diagram's arrows and
  checked against the cycle counts. These are 00011, 00100, 01110, 10100,
  01111, 01100, 01001, 00110, 10000 and 10001.
- **ADDR is 16 bits.** It holds the X pointer r27:r26, and the RAM uses its
  low 8 bits.
- **Sizes and machinery not specified by the reference.** The memory sizes,
  the reset and the program-loading port were chosen for this design.
- **The flag update in state 01101.** The reference lists only SREG_we for
  this state. This design also holds the ALU selects, as explained above.
- **The ALU_op encoding.** One trace uses 0 for addition, and a later slide
  says 1. This design uses 0 = add, 1 = subtract.
- **The ldi/add trace.** It shows an addition of 23 and 11 giving 44. This
  design gives 34, which is also what the test expects.
- **The branch condition.** The flag test for brlo/brsh/brne uses the
  standard AVR rule. A small truth table over C and Z in the reference does
  not say which branch it belongs to, and it was not used.
- **inc and regjump.** Their encodings and the numbers of their new states
  are this design's own.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `alu_tb`: exhaustive over all operand pairs and both operations.
- `aux_reg_tb`, `reg_file_tb`, `data_ram_tb`, `prog_mem_tb`: random accesses
  checked against reference arrays.
- `branch_logic_tb`: all four branches, all C/Z combinations, positive and
  negative offsets.
- `mcpu_ctrl_tb`: checks the state sequence and the cycle count of every
  instruction, and the control signals of every state the traces show.
- `mcpu_tb`: the end-to-end test, at the default sizes.
  - An instruction-level reference model runs in lock-step with the
    processor. At every fetch the test compares PC, all registers, C, Z and
    the written RAM bytes. It also checks the cycles of every instruction
    against the table above.
  - It checks the traces of `ldi r16,45` and `add r17,r18` cycle by cycle:
    the state numbers, and INST = 57869 / 3858, REG, REG2, VAL1, VAL2, VAL,
    RF and PC.
  - It runs the example loop `ldi r16,45; ldi r17,23; ldi r18,11;
    add r17,r18; breq 4; rjmp -3`. r17 wraps to 0 after 91 additions, and the
    run takes 1739 cycles (3*5 + 91*9 + 91*5 + 90*5), which is checked.
  - It runs a program using every instruction, with each branch both taken
    and not taken, and 30 random programs.
  - It counts how often each instruction class ran, branches taken and not
    taken, SREG updates, write-backs, RAM reads and writes, and PC = VAL
    jumps. A mechanism that never happened counts as a failure.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/mcpu_pkg.sv tb/mcpu_tb.sv --top-module mcpu_tb -o sim
./obj_dir/sim
```

Use the same command with another `tb/<name>_tb.sv` and `--top-module
<name>_tb` for the block tests.

## Adding an instruction

1. Add a class to `opclass_t` and a pattern to `decode_op` in `mcpu_pkg.sv`.
2. Work out its walk through existing states, and add a state to `state_t`
   only where no existing transfer fits.
3. In `mcpu_ctrl.sv`, route it in the next-state logic. A new state also
   needs its control outputs.
4. If the transfer needs a new source, add a leg to the multiplexer in
   `mcpu.sv` and widen its select in `ctrl_t`. That is how `inc` got the
   constant 1 into OFF.
5. Add its encoder and its semantics to the model in `tb/mcpu_tb.sv`.
