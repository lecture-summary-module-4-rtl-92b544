# Simple Computer and arithmetic building blocks

This is SystemVerilog for a small teaching computer and a set of binary and decimal arithmetic
circuits. The computer, called the Simple Computer here, stores its program in memory and executes it one instruction at a time.
It has one 8-bit accumulator, 32 words of memory, and 3-bit opcodes. The arithmetic circuits run from
half and full adders up to carry look-ahead adders, array multipliers and decimal (BCD) adders. All of
them follow an introductory course on arithmetic and computer logic circuits. Where that course left a
detail open, this design made a choice, and the choices are listed under "Departures and choices".

Everything is in `rtl/` (one module or package per file) and `tb/` (self-checking testbenches).
`module4_top` places the five versions of the computer and the arithmetic circuits side by side, each
with its own ports. They share no signals.

## The Simple Computer

### Programming model

An instruction is one 8-bit memory word. Bits 7:5 hold the opcode and bits 4:0 hold a memory address.
The machine has one visible register, the accumulator A, and four flags: C (carry), V (overflow),
N (negative) and Z (zero). Memory is 32 x 8 and holds the program, its operands and its results.

| opcode | base machine | I/O version | shift + jump version | stack version | subroutine version |
|---|---|---|---|---|---|
| 000 | HLT | HLT | HLT | HLT | HLT |
| 001 | LDA a: A <- (a) | LDA | LDA | LDA | LDA |
| 010 | ADD a: A <- A + (a) | ADD | LSR: A <- A >> 1, C <- A0 | ADD | ADD |
| 011 | SUB a: A <- A - (a) | SUB | ASL: A <- A << 1, C <- A7 | SUB | SUB |
| 100 | AND a: A <- A & (a) | AND | ASR: arithmetic >> 1, C <- A0 | AND | AND |
| 101 | STA a: (a) <- A | STA | STA | STA | STA |
| 110 | (no-op) | IN p: A <- port | JMP a: PC <- a | PSH: push A | JSR a: call a |
| 111 | (no-op) | OUT p: port <- A | JZF a: PC <- a if Z = 1 | POP: pop into A | RTS: return |

Each extension gives the two spare opcodes its own meaning, so the extensions cannot share one 3-bit
machine. `simple_computer` therefore has a `VARIANT` parameter (`sc_pkg::variant_e`: `VAR_BASE`,
`VAR_IO`, `VAR_JUMP`, `VAR_STACK`, `VAR_SUBR`). The top instantiates all five versions.

Flags: ADD and SUB change all four flags. LDA, AND and IN change only N and Z. The three shifts change
C, N and Z. The other instructions leave the flags alone. After SUB, C is the carry out of the adder,
so C = 1 means "no borrow". V is the carry into bit 7 XOR the carry out of bit 7.

### Blocks and buses

```
                 START   clk
                   |      |
            +------v------v------------------------------------------+
            | idms: state counter S0..S3, RUN flip-flop, decoder      |
            +--+---------+---------+---------+---------+---------+---+
   opcode ---->| ctl     | ctl     | ctl     | ctl     | ctl     | ctl
            +--v-----+ +-v------+ +v------+ +v------+ +v------+ +v------+
            | PC     | | IR     | | ALU   | | memory| | SP    | | I/O   |
            +-+----+-+ +-+----+-+ +---+---+ +-+---+-+ +-+-----+ +-+---+-+
              |    |     |    |       |       |   |     |         |   |
address bus   +====|=====+====|=======|=======+===|=====+=========+   |   (5 bits)
data bus           +==========+=======+===========+===================+   (8 bits)
```

- `memory` is 32 x 8. When MSL and MOE are both set, the addressed word is driven onto the data bus.
  The read is combinational. When MSL and MWE are both set, the memory writes the data bus word on
  the clock edge.
- `program_counter` counts up on PCC. On PLA it loads from the address bus, and on PLD it loads from
  the data bus, truncated to 5 bits. START resets it asynchronously to 0.
- `instruction_register` loads the data bus on IRL. Its opcode field goes to the decoder. Its address
  field goes onto the address bus on IRA.
- `alu` (ADD/SUB/LDA/AND) or `alu_shift` (LDA/LSR/ASL/ASR) holds A and the flags. Both update only
  when ALE is set, and ALX and ALY choose the function. On AOE, A goes onto the data bus.
- `io_port` answers at I/O address 00000. On IOR, it drives its input pins onto the data bus. On IOW,
  a transparent latch takes the data bus and drives the output pins until the next OUT. The unlatched
  alternative (`LATCHED = 0`) drives the output pins only during the OUT cycle.
- `stack_pointer` starts at 00000, which means the stack is empty. The stack grows downwards, so the
  first push goes to location 11111. SP increments on SPI, decrements on SPD, and is driven onto the
  address bus on SPA.

The buses are not tri-state here. Each driver has an enable signal. A bus is the OR of the values of
its enabled drivers. The rule that only one device may drive a bus in a cycle is checked by two
assertions in `simple_computer`. None of the test programs triggers them.

### Fetch, execute and the control table

`idms` holds a 2-bit state counter: S0 is the fetch cycle, and S1 to S3 are execute cycles. Every
clock the counter counts up. In the last execute cycle of an instruction, the decoder asserts RST,
and the counter returns to S0 at the next clock edge.

The subtle point is the fetch cycle. In S0 the PC addresses memory, and the instruction appears on
the data bus. The clock edge that ends S0 does two things at once: IR takes the instruction that was
on the bus before the edge, and PC counts up after it. So an instruction fetches and increments the PC
in one cycle, and its execute cycles already see PC pointing to the next instruction. JSR relies on
this: it pushes that PC as the return address.

Control signals per state (all active high, decoded combinationally from the state and the opcode):

| state | instruction | asserted |
|---|---|---|
| S0 | all | MSL MOE POA PCC IRL |
| S1 | LDA / ADD / SUB / AND | MSL MOE IRA ALE, plus ALX/ALY: LDA=10, ADD=00, SUB=01, AND=11 |
| S1 | STA | MSL MWE IRA AOE |
| S1 | LSR / ASL / ASR (shift ALU) | ALE with ALX ALY = 01 / 10 / 11; LDA is 00 in this ALU |
| S1 | IN / OUT | IRA ALE ALX IOR / IRA AOE IOW |
| S1 | JMP / JZF | IRA PLA / IRA PLA only if Z = 1 |
| S1, S2 | PSH | SPD, then SPA MSL MWE AOE |
| S1 | POP | SPA MSL MOE ALE ALX SPI (read the top item and pop in one cycle) |
| S1, S2, S3 | JSR | SPD, then SPA MSL MWE POD (push PC), then IRA PLA (jump) |
| S1 | RTS | SPA MSL MOE PLD SPI (reload PC and pop in one cycle) |

RST is asserted in the last row of each instruction. Cycle counts are:

- 2 cycles for every instruction with one execute cycle;
- 3 cycles for PSH;
- 4 cycles for JSR.

### START, RUN and HLT

START is an asynchronous push-button. It resets the PC, SP, A, the flags and the state counter, and it
sets RUN. When a HLT is decoded in S1, RUN clears immediately. This design models that as
`run = RUN_q & ~(S1 & HLT)`. That gated `run` disables the enables of that same cycle, and `RUN_q`
takes its value at the next edge. With RUN low, the counter stays in S0 and nothing changes until the
next START. The PC then points just past the HLT.

### Loading a program

The machine itself has no way to load memory. The `ld_we/ld_addr/ld_data` port of `simple_computer`
writes memory directly, and the `dbg_addr/dbg_data` port reads it. Both are additions of this design.
Load a program while START is held. Then release START on a clock edge, and the machine fetches from
address 00000. `tb/tb_programs_pkg.sv` shows five small programs, one per version.

## Arithmetic circuits

| module | what it does | default size |
|---|---|---|
| `half_adder`, `full_adder` | 1-bit adders; the half adder also serves as the P/G cell of a CLA | - |
| `vote_counter` | number of 1s among five votes, from one half adder and two full adders | 5 inputs |
| `digi_vota_matic` | sum of three 2-bit judge scores (0..9) shown on a 7-segment digit | 3 judges |
| `addsub_cc` | ripple adder/subtractor: B XOR M, with M as carry in; flags C, N, Z, V | `WIDTH` 4 |
| `mag_comparator` | A-B through `addsub_cc`; the relations come from the flags only | `WIDTH` 4, `SIGNED` 1 |
| `cla4` | 4-bit carry look-ahead adder with two-level carry equations | 4 bits |
| `group_ripple_adder` | `cla4` blocks whose carries ripple from block to block | `WIDTH` 16 |
| `mult_array` | N x M unsigned array multiplier from AND gates and full adders | `N` 4, `M` 4 |
| `nines_complement` | 9 - digit for one BCD digit | - |
| `bcd_full_adder` | binary add, then add 6 when Z4 + Z3.Z2 + Z3.Z1 | 1 digit |
| `bcd_addsub` | ripple of BCD full adders; to subtract, it adds the nines' complement plus 1 | `DIGITS` 4 |

The comparator uses these relations:

- signed: A<B = N XOR V, and A>B = V.N + V'.N'.Z';
- unsigned: A<B = C', and A>B = C.Z'.

The multiplier uses N x M AND gates and M rows of N-1 full adders. The first M-1 rows are carry-save
rows, and the last row is a ripple-carry adder. A 6 x 4 array therefore has 20 full adders and a
4 x 6 array has 18.

## Departures and choices

- The buses are OR-multiplexed rather than tri-state, and an assertion enforces a single driver.
- The specified memory writes through a latch that is open while MSL and MWE are set. Here it writes
  on the clock edge at the end of that cycle, which stores the same word.
- A and the flags are reset by START. The specified ALU has no reset.
- There is one PC module, the most complete version with PLA, PLD and POD. Versions that do not jump
  tie those inputs low.
- All versions use the 2-bit multi-cycle state counter. The single-cycle versions never leave S1, so
  they behave like a 1-bit fetch/execute flip-flop.
- Where a control equation and its control table disagree, the table is followed:
  - IN asserts ALX, so it loads A rather than adding to it;
  - the jump version uses the shift ALU.
- One description of the shift ALU clears C whenever ALE is low. This design keeps C instead, and
  follows the stated rule that every ALU register holds its value while ALE is low.
- SP points to the top stack item. The other common convention has SP point to the next free
  location, which changes the cycle counts of PSH and JSR. It is not built.
- The opcodes for PSH/POP and for JSR/RTS are not fixed by the specification. They use 110/111 here.
  Spare opcodes in the base machine act as no-ops.
- Other sizes chosen here:
  - group ripple adder: 16 bits;
  - BCD adder/subtractor: 4 digits.
- The 7-segment output is active high, in the order {a,b,c,d,e,f,g}.
- The leaf blocks have width parameters. `sc_pkg` fixes the machine at 5 address bits, 8 data bits
  and 3 opcode bits, as specified.

## Verification

Every module has a testbench `tb/tb_<module>.sv`. Each one compares the module against values
computed independently and prints `TB_RESULT checks=N failures=M`. Each also has a watchdog.

- The combinational circuits are checked exhaustively where that is small. This includes the 4 x 4,
  6 x 4, 4 x 6, 4 x 2 and 2 x 4 multipliers and every BCD digit pair. Wider circuits get random operands.
- `tb_idms` checks the control word of every state of every version against the table above. It also
  checks the number of execute cycles and the HLT/START behaviour.
- `tb_simple_computer` runs one program per version and checks results, registers, flags and the
  number of cycles:
  - base: the ADD/AND/SUB program on 10101010 and 01010101 gives 11111111, 00000000 and 01010101,
    with C=1 V=1 N=0 Z=0, in 19 cycles;
  - I/O: an IN/ADD/OUT program;
  - shift + jump: a shift loop closed by JZF/JMP;
  - stack: two pushes and two pops;
  - subroutine: nested JSR/RTS.

  It then restarts the base machine and traces its first six cycles, the fetch and execute of LDA,
  ADD and STA. In each cycle it checks the state, the address bus and the data bus. After each clock
  edge it checks PC, IR, A and the flags against hand-worked values.
- `tb_module4_top` runs all of that through the top at its default sizes. It also exercises every
  arithmetic circuit, and it counts each mechanism: fetch, HLT, multi-cycle execution, IN, OUT, JMP,
  JZF taken and not taken, PSH, POP, JSR, RTS, ALU overflow, adder overflow/carry/borrow/zero/negative,
  BCD correction and borrow, comparator <, = and >, and a carry through all CLA blocks. Every count
  must be non-zero.

Simulate a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sc_pkg.sv tb/tb_programs_pkg.sv \
          tb/tb_module4_top.sv --top-module tb_module4_top
./obj_dir/Vtb_module4_top
```

The testbenches that do not use the programs need only `rtl/sc_pkg.sv` and their own file. To write a
program for the computer, build a 32-word image as in `tb_programs_pkg::prog` and load it through the
`ld_*` port while START is high.
