# GPISP-16: a small 16-bit multi-cycle processor with button interrupts

This is a 16-bit load-store processor in the classic multi-cycle style: one
ripple-carry ALU, a handful of data-path registers and a state machine that
walks every instruction through three to five clock cycles. It was designed
for a teaching board with push buttons, DIP switches and a seven-segment
display, and two ideas shape it:

* **Everything is 16 bits and every instruction has the same four fields.**
  Op-code, destination, argument 1 and argument 2 are 4 bits each, so three
  register operands fit every word, immediates are 8 bits, and jumps go
  through a register.
* **Interrupts are an instruction.** A button press does not redirect the
  fetch address. It replaces the next fetched word with a fixed
  "interrupt op-code", and the ordinary decode logic runs an instruction that
  saves the return address, disables interrupts and jumps to the handler.

There is no shifter, multiplier or divider. Software builds those out of
add, subtract and compare.

## Instruction set

Instruction word, bit 15 most significant:

| bits    | 15..12  | 11..8            | 7..4        | 3..0        |
|---------|---------|------------------|-------------|-------------|
| A-type  | op-code | rd (destination) | rs (arg. 1) | rt (arg. 2) |
| I-type  | op-code | rd               | imm[7:4]    | imm[3:0]    |
| J-type  | op-code | rd (target reg.) | 0           | 0           |

The op-codes follow a simple rule. Op-codes whose two top bits are not both
1 (0 to 11) are A-type. 1100/1101 are the I-type loads and 1110/1111 the
jumps.

| op | mnemonic | operation | cycles |
|----|----------|-----------|--------|
| 0  | `add rd, rs, rt` | rd = rs + rt (wraps) | 4 |
| 1  | `sub rd, rs, rt` | rd = rs - rt (wraps) | 4 |
| 2  | `lw rd, rs, rt`  | rd = mem[rs + rt] | 5 |
| 3  | `sw rd, rs, rt`  | mem[rs + rt] = rd | 4 |
| 4  | `rv rd, sN`      | rd = special register sN (field 7..4) | 3 |
| 5  | `ov sN, rs`      | special register sN (field 11..8) = rs | 3 |
| 6  | `slt rd, rs, rt` | rd = (rs < rt, signed) ? 1 : 0 | 4 |
| 7  | `and rd, rs, rt` | rd = rs & rt | 4 |
| 8  | (spare)          | does nothing | 2 |
| 9  | `bne rd, rs, rt` | if rs != rt: PC = rd | 3 / 4 taken |
| 10 | `beq rd, rs, rt` | if rs == rt: PC = rd | 3 / 4 taken |
| 11 | (interrupt)      | internal only, see below | 4 |
| 12 | `lui rd, imm8`   | rd[15:8] = imm8, rd[7:0] kept | 3 |
| 13 | `lli rd, imm8`   | rd[7:0] = imm8, rd[15:8] kept | 3 |
| 14 | `jr rd`          | PC = rd; if rd is `$ir`, re-enable interrupts | 3 / 4 for `$ir` |
| 15 | `jal rd`         | `$ar` = PC of the next instruction; PC = rd | 3 |

Addresses are byte addresses of 16-bit words, and the PC advances by 2.
Branch and jump targets are full 16-bit addresses held in a register. An
assembler builds them with a `lui`/`lli` pair, the `load` pseudo-instruction.
The two loads leave the other byte alone, so the pair can be issued in either
order. The branch condition compares the two argument registers. The target
register is the destination field.

## Registers

| number | name | use |
|--------|------|-----|
| 0 | `$zero` | always 0, writes ignored |
| 1-4 | `$s0-$s3` | saved |
| 5-8 | `$t0-$t3` | temporaries |
| 9, 10 | `$a0, $a1` | arguments |
| 11, 12 | `$v0, $v1` | return values |
| 13 | `$ar` | return address, written by `jal` |
| 14 | `$bs` | button state register |
| 15 | `$ir` | interrupt return address |

The calling convention fixes only how many registers of each kind there are.
The numbers of `$ar` and `$bs` are this implementation's choice, and they are
constants in `rtl/gpisp_pkg.sv` (`REG_AR`, `REG_BS`). `$zero` = 0 and
`$ir` = 15 are part of the original design.

**`$bs`, the button state register.** Bits 14..0 record the 15 push buttons.
A 0 bit becomes 1 in any cycle in which its button input is high. It stays 1
until software writes the register, for example with `and` and a mask. If a
button is pressed in the same cycle as a software write, the button wins for
a bit that is still 0. Bit 15 is the **interrupt enable bit**, with inverted
sense: 0 means interrupts are accepted and 1 means they are ignored. Software
can write it like any other bit, and the interrupt sequence sets and clears
it. Button presses are recorded in `$bs` whether or not interrupts are
enabled.

**Special registers.** Two more registers sit outside the register file and
are reached only by `rv` and `ov`:
`$vr` (special register 0) follows the 16-bit DIP-switch input; it is
re-sampled every clock. `$dr` (special register 1) is written by `ov` and
drives the `display` output, meant for four seven-segment digits. Other
special numbers read 0 and ignore writes.

## How an instruction runs

`gpisp_control` is a Moore state machine. Every instruction begins with the
same two states:

1. **FETCH.** The IR is loaded with the word at PC, or with the interrupt
   op-code (see below). The ALU computes PC + 2, which is written into the PC.
2. **DECODE.** The register file is read on three ports at once: A = reg[rs],
   B = reg[rt], C = reg[rd]. The next state depends on the op-code.

The execute states then work on A, B and C. The ALU result is always
captured in a register called SUM, and the memory word in MDR. Both load
every cycle, so a result computed in one state is written back in the next.
For `add`, `sub`, `and` and `slt` that takes two states: compute, then write
SUM to rd. `lw` takes three: compute the address, read the memory at SUM,
then write MDR. Branches compute A - B and use the ALU's `zero` flag to
decide whether to spend a fourth cycle loading C into the PC. `jr` and `jal`
write the PC in their single execute state. After reset the machine spends
one idle cycle before the first fetch from address 0.

With these cycle counts, the relative-prime program below averages 3.27
cycles per instruction.

## Interrupts

The interrupt path is the least conventional part of the design.

1. **Request.** `gpisp_int_latch` is a one-bit register. It is set in any
   cycle in which a button input is high and `$bs[15]` is 0. A one-cycle
   pulse is enough. The same press also sets the button's bit in `$bs`.
2. **Injection.** At the next FETCH, a set latch makes the IR load `0xB000`
   (op-code 11) instead of the memory word. The PC is still advanced by 2, so
   the instruction at the old PC has been skipped but not executed.
3. **Interrupt op-code, first state.** The ALU computes PC - 2, the address
   of the skipped instruction, into SUM. The control sets `$bs[15]` to 1,
   which disables further interrupts, and clears the latch.
4. **Second state.** SUM is written to `$ir` (register 15), and the PC is
   loaded with the handler address `0xE000`.
5. **Return.** The handler ends with `jr $ir`. Besides jumping, `jr` uses the
   ALU to subtract 15 from the zero-extended destination field. If the
   result is zero, the target register was `$ir`, and a fourth state clears
   `$bs[15]`, enabling interrupts again. `jr` through any other register
   leaves the enable bit alone.

Because the enable bit lives in an ordinary register, software can mask
interrupts by writing `$bs` (for example `add $bs, $a1, $zero` with
`$a1 = 0x8000`), and a handler can see which button fired by reading `$bs`.
While interrupts are masked, presses are only recorded in `$bs`. There is no
nesting: `$ir` is overwritten by every interrupt.

## ALU

`gpisp_alu` is a chain of 16 one-bit slices (`gpisp_alu_bit`), each a full
adder plus an AND gate and an output selector. The 2-bit operation is
add = 0, sub = 1, and = 2, slt = 3. Its low bit serves as both "invert B"
and the carry into bit 0, so subtract and set-less-than compute A + ~B + 1
with no separate control. Overflow is the carry into the top slice XOR its
carry out. It is used for one thing only: the set-less-than bit is the sign
of A - B XOR overflow, routed to the output of slice 0 (all other slices output 0). `slt` is
therefore correct for all signed operands, including -32768 < 32767, while
`add` and `sub` silently wrap. `zero` is the NOR of the 16 result bits.

## Data path

`gpisp_cpu` holds the data-path registers (PC, IR, A, B, C, SUM, MDR) and
seven multiplexers, whose select values are fields of the control word
`ctrl_t` in `gpisp_pkg`:

| multiplexer | 0 | 1 | 2 | 3 | 4 | 5 |
|-------------|---|---|---|---|---|---|
| ALU input 1 | PC | A | - | rd field, zero-extended | | |
| ALU input 2 | B | 2 | 15 | - | | |
| PC input | ALU result | C | 0xE000 | | | |
| memory address | PC | SUM | | | | |
| write register | rd | `$ar` | `$ir` | | | |
| write data | PC | SUM | MDR | special register | {imm8, C[7:0]} | {C[15:8], imm8} |
| IR input | memory | 0xB000 (latch set) | | | | |

`EXC_ADDR` (0xE000) and `INT_INSTR` (0xB000) are parameters of `gpisp_cpu`.

## Interface and timing

`gpisp_cpu` ports:

| port | dir | width | |
|------|-----|-------|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `mem_addr` | out | 16 | byte address (PC during fetch, SUM for `lw`/`sw`) |
| `mem_read`, `mem_write` | out | 1 | strobes |
| `mem_wdata` | out | 16 | store data (register rd) |
| `mem_rdata` | in | 16 | word at `mem_addr`, combinational |
| `buttons` | in | 15 | push buttons, active high |
| `switches` | in | 16 | DIP switches |
| `display` | out | 16 | `$dr` |
| `pc_q`, `ir_q`, `state`, `int_pending`, `bs_q` | out | | observation only |

The memory is external. It must return the addressed word in the same cycle,
because fetch loads the IR at the end of the FETCH cycle. It must write on
the rising edge when `mem_write` is high. Bit 0 of the address is always 0.
The button inputs are sampled on the clock without synchronisers, so
asynchronous switches need to be synchronised outside the design.

## Where this implementation interprets the original design

The original material gives the state machine, the data-path sketch, the
register file, the button state register and the ALU. The points below were
left open or were ambiguous there, and this RTL settles them as stated:

* **Op-code numbers** follow the original control diagram. The spare op-code
  is 8, and op-code 8 returns straight to fetch. Which of 9 and 10 is `bne` and which is `beq` is this
  implementation's reading of that diagram.
* **Branch sense.** Taken from the instruction names and the original
  branch test program: `beq` jumps on equal. The diagram's own condition
  labels read the other way round.
* **jr/jal/interrupt PC source.** The diagram writes the PC in these states
  without naming a PC multiplexer input. Here `jr`/`jal` load C and the
  interrupt loads 0xE000. `jr`'s compare with 15 is done as a subtraction.
* **Latch reset** happens in the first interrupt state. The `lw` memory
  read is explicitly strobed in its read state.
* **Register numbers** of `$ar` and `$bs`, the **special register numbers**,
  the `rv` source field (7..4), **reset values** (everything 0, so interrupts
  are enabled at reset and the first fetch is from 0x0000), and the
  button-versus-clear priority of the latch.
* **The memory data register is kept.** The original notes call it possibly
  unnecessary, but `lw` reads memory and writes the register in separate
  states, so it is needed here.
* The register file is written as an array with decoders, not as sixteen
  separately drawn registers.

## Files

| file | contents |
|------|----------|
| `rtl/gpisp_pkg.sv` | op-codes, ALU ops, register numbers, control word, states |
| `rtl/gpisp_cpu.sv` | top level: data path and block instances |
| `rtl/gpisp_control.sv` | state machine |
| `rtl/gpisp_alu.sv`, `rtl/gpisp_alu_bit.sv` | ALU and its bit slice |
| `rtl/gpisp_regfile.sv` | 16 x 16 register file, 3 read ports |
| `rtl/gpisp_bsr.sv` | button state register with interrupt enable bit |
| `rtl/gpisp_special.sv` | `$vr` / `$dr` |
| `rtl/gpisp_int_latch.sv` | interrupt request latch |
| `tb/gpisp_tb_mem.sv` | behavioural memory for the testbenches |
| `tb/gpisp_asm_pkg.sv` | instruction encoders used to write test programs |
| `tb/tb_*.sv` | self-checking testbenches |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
from the top directory:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/gpisp_pkg.sv tb/gpisp_asm_pkg.sv tb/tb_gpisp_cpu.sv \
    --top-module tb_gpisp_cpu -Mdir obj_cpu
./obj_cpu/Vtb_gpisp_cpu
```

The unit testbenches (`tb_gpisp_alu`, `_bsr`, `_regfile`, `_special`,
`_int_latch`, `_control`) need only `rtl/gpisp_pkg.sv` and their own file.

* `tb_gpisp_cpu` runs a program that exercises every instruction, including
  the spare op-code. It includes the overflowing `slt` case, both outcomes
  of both branches, a `jal`/`jr $ar` call, an accepted interrupt with
  return through `$ir`, and a press ignored while interrupts are masked. It
  checks the stored results, and it fails if any of the 29 control states
  or these events never occurs.
* `tb_gpisp_beq_program` runs the original branch-on-equal test program, a
  count-down loop. It checks that the loop exits after exactly 73 cycles, the
  number the per-instruction cycle counts above predict.
* `tb_gpisp_relprime` runs the original design's benchmark: find the smallest
  number relatively prime to the switch value, with a subtraction-based gcd
  procedure. For n = 0x13B0 it displays 0x000B after 367,374 cycles
  (112,259 instructions, 3.27 cycles per instruction). The original
  implementation reported about 409,000 cycles and an estimated 3.37 cycles
  per instruction for its own version of the program. Those figures depend on
  how the program is written.
* `tb_gpisp_relprime_buttons` runs the same computation as the board
  would. Button 0 makes the interrupt handler copy the switches into the
  input register and echo them on the display. Button 1 makes the handler set
  a start flag that the main program is waiting for. This exercises the
  interrupt path inside a real program: two interrupts, `$bs` decoding with
  `and`, and returns through `$ir`.
* `tb_gpisp_gcd` runs the gcd procedure on its own, for 16 operand pairs:
  fixed cases, zero operands, and random 15-bit pairs. One operand comes
  from the switches and the other from memory (`lw`). The result is stored
  back (`sw`) and shown on the display, and both are compared with a
  reference gcd.
* `tb_gpisp_control` checks the cycle count and the write enables of every
  op-code against a table. `tb_gpisp_alu` compares 4,000 random and corner
  operations with integer arithmetic.

All testbenches run with the processor's default parameters.

## Not included

* **Main memory.** The original used a course-supplied memory that loads its
  program on reset. Here it is a port, with a behavioural model in `tb/`.
* **Seven-segment driver.** `display` carries the binary value. Decoding and
  digit multiplexing are left to the board.
* **FPGA pin buffers and constraints** for the original Spartan-IIE board.
