# A three-cycle teaching CPU for an FPGA board

This is a deliberately small processor. It runs programs of up to 256
16-bit instructions from a ROM. It has sixteen 32-bit registers, an ALU
that can add, subtract and compare for equality, and one conditional
branch. It reads the board's slide switches and shows a result in decimal
on a multiplexed seven-segment display. Each instruction takes exactly three
clock cycles: FETCH, EXECUTE, UPDATE. There is no pipeline, no data memory
and no interrupt; the point of the design is that every instruction can be
followed by hand, cycle by cycle.

Programs communicate with the outside world by convention. `LOAD_INPUT`
copies the switches into a register. Whatever a program writes into
**register 15** appears on the display and the LEDs at the end of that
instruction.

## Block structure

```
            +--------------------------------------------------+
  clk ----->|                      cpu                         |
  rst ----->|                                                  |
            |   +-------------+ pc   +-------------+           |
            |   |             |----->| program_rom |           |
  sw[15:0]->|-->| control_    |<-----| 256 x 16    |           |
            |   | unit        | instr+-------------+           |
            |   | FETCH/EXEC/ |                                |
            |   | UPDATE, PC  |<---->+---------------+         |
            |   |             | r/w  | register_file |         |
            |   |             |      | 16 x 32       |--r15--+ |
            |   |             |----->+---------------+       | |
            |   |             | in1,in2,op  +-----+          | |
            |   |             |------------>| alu |          | |
            |   |             |<------------+-----+          | |
            |   +-------------+ alu_out                      | |
            |        | display_value (r15 at UPDATE) <-------+ |
            |        v                                         |
            |   +--------------+      an_n[3:0], seg_n[6:0]    |---> display
            |   | seg7_display |------------------------------>|
            |   | bin_to_bcd,  |                               |
            |   | seg7_decoder |      led[15:0] = display_value|---> LEDs
            |   +--------------+                               |
            +--------------------------------------------------+
```

| Module | Role |
|---|---|
| `cpu_pkg` | Opcodes, ALU codes, state type, instruction struct, widths |
| `cpu` | Top level; wires everything together |
| `control_unit` | Three-state sequencer, program counter, decode and execution |
| `program_rom` | 256 x 16 instruction memory, registered read, loaded with `$readmemh` |
| `register_file` | 16 x 32 registers, 2 read ports, 1 write port, register 15 brought out |
| `alu` | Add, subtract, equality compare |
| `seg7_display` | Digit scan with refresh divider; uses `bin_to_bcd` and `seg7_decoder` |
| `bin_to_bcd` | Combinational binary to decimal conversion (shift-and-add-3) |
| `seg7_decoder` | One decimal digit to seven segments, active low |

All logic runs on one clock. Reset is synchronous and active high. It clears
the program counter, every register, the ALU operand latches and the display
value.

## Instruction set

Every instruction is 16 bits. Bits 15..13 are the opcode. The remaining
fields are placed so that each one sits next to the 3-bit opcode:

| Opcode | Mnemonic | Bits 12..9 | Bits 8..5 | Low bits | Effect |
|---|---|---|---|---|---|
| `000` | `mov a b` | a | b | – | `r[b] = r[a]` |
| `001` | `load a imm` | a | imm[8:5] | imm[4:0] | `r[a] = imm` (9 bits, zero-extended) |
| `010` | `alu a b op` | a | b | op in [1:0] | latch `r[a]`, `r[b]`, op into the ALU |
| `011` | `save_alu a` | a | – | – | `r[a] = ALU result` |
| `100` | `load_input a` | a | – | – | `r[a] = switches` (zero-extended) |
| `101` | `branch_if_zero a t` | a | – | target in [7:0] | if `r[a] == 0`, next PC = t |
| `110` | – | – | – | – | no operation |
| `111` | `end` | – | – | – | stop; PC freezes until reset |

ALU operations (`op`, bits 1..0): `00` add, `01` subtract (`r[a] - r[b]`,
wraps at 32 bits), `10` equality (result 1 if equal, else 0). `11` gives 0.

Things to know when writing programs:

* **The ALU works in two steps.** `alu` only captures its two operands and
  the operation. The result is written to a register by a later `save_alu`.
  Because the operands are captured, the result stays valid however many
  other instructions come in between, and it changes only at the next `alu`.
* **The only branch is `branch_if_zero`, to an absolute address.** An
  unconditional jump is a `branch_if_zero` on a register that holds 0. The
  example programs keep such a zero in a register for this purpose.
* **Immediates are 9 bits (0..511).** Larger constants have to be built
  with the ALU, for example by adding a register to itself to double it.
* **Register 15 is the output.** The display and LEDs take a copy of
  register 15 in the UPDATE state of every instruction.
* There is no hardware stack, call or memory access beyond the 16 registers.

Machine code is written as a hex image, one word per line. `$readmemh`
accepts `//` comments, so the example images carry their assembly next to
each word:

* `rtl/fibonacci.mem` is the default program. It computes the Fibonacci
  sequence in r0/r1, with the sum in r4, and shows each number through r15:
  0, 1, 1, 2, 3, 5, ... 55 is the 11th value. It loops forever and wraps at
  2^32.
* `tb/countdown.mem` counts r0 down from 5 to 0, showing each value, then
  executes `end`.
* `tb/switch_add.mem` reads the switches twice, shows their sum, then shows
  whether the two readings were equal, then ends.

To assemble by hand, pack the fields as in the table. For example,
`alu 0 1 sub` = `010 0000 0001 000 01` = `4021`.

## Cycle-by-cycle timing

The control unit steps through three states. `state` and `pc` are top-level
ports, so they can be watched in a simulation.

| State | What happens during the cycle | What the closing clock edge does |
|---|---|---|
| FETCH | `pc` addresses the ROM | ROM output register captures `rom[pc]`; this register is the instruction register |
| EXECUTE | Instruction decoded. Register reads use fields a and b directly from the ROM output | Register write (`mov`, `load`, `save_alu`, `load_input`); or ALU operands latched (`alu`); or branch condition stored (`branch_if_zero`); or halt flag set (`end`) |
| UPDATE | – | `pc` becomes `pc+1` or the branch target; display value takes a copy of r15 |

The throughput is therefore one instruction per 3 cycles, with no
exceptions. The program counter wraps from 255 to 0. A register written by
one instruction can be read by the very next one, because the write happens
two cycles before the next EXECUTE. Since the display copy is taken in the
same instruction's UPDATE, a write to r15 is visible on `led` at the start
of the following FETCH.

After `end`, the sequencer finishes that instruction's UPDATE without moving
the PC. It then stays in FETCH, with `halted` high, until reset.

## Display path

`seg7_display` lights one digit at a time. A counter produces a one-cycle
tick every `REFRESH_DIV` clocks, and each tick moves the scan to the next
digit. With the default 100,000 and a 100 MHz board clock, each digit is lit
for 1 ms and the four digits refresh at 250 Hz. The divider is a clock
enable inside the main clock domain, not a derived clock, so the display
needs no clock-domain crossing or extra clock constraints.

The 32-bit display value is converted to ten decimal digits by a
combinational shift-and-add-3 converter. The scan picks the digit for the
current position, and `seg7_decoder` turns it into segments.

* `an_n[i]` is low while digit i is lit. `an_n[0]` is the units digit.
* `seg_n[0..6]` are segments a..g, active low, as for common-anode
  displays.
* Only the lowest `NUM_DIGITS` (4) decimal digits are shown, so values of
  10,000 and more show modulo 10,000. Leading zeros are shown (55 appears as
  `0055`).

`led[15:0]` shows the low 16 bits of the same value in binary.

The converter is the largest piece of logic in the design, about 1,200
word-level cells before mapping. If area matters, reduce `bin_to_bcd`'s
`DIGITS`, or replace it with a sequential converter that runs once per
display update.

## Parameters

| Where | Parameter | Default | Meaning |
|---|---|---|---|
| `cpu` | `PROGRAM` | `"rtl/fibonacci.mem"` | Hex image loaded into the ROM; path relative to the simulator's working directory |
| `cpu`, `seg7_display` | `NUM_DIGITS` | 4 | Display digits scanned |
| `cpu`, `seg7_display` | `REFRESH_DIV` | 100000 | Clocks per lit digit |
| `cpu_pkg` | `DATA_W`, `NREGS`, `PC_W`, `INSTR_W` | 32, 16, 8, 16 | Register width, register count, PC width (256 words), instruction width |
| `cpu_pkg` | `IMM_W`, `SW_W`, `OUT_REG` | 9, 16, 15 | LOAD immediate width, switch count, output register |

The instruction fields are fixed by `instr_t` in `cpu_pkg`. Changing
`NREGS` or `PC_W` means changing that layout too.

## Simulation

Run these from the repository root. The hex images are opened by paths
relative to it.

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
    rtl/cpu_pkg.sv tb/cpu_ref_pkg.sv tb/cpu_tb.sv --top-module cpu_tb
obj_dir/Vcpu_tb
```

Replace `cpu_tb` with any other testbench name. Each testbench prints one
`TB_RESULT checks=N failures=M` line and stops on its own. A watchdog counts
a failure if a run hangs.

| Testbench | What it checks |
|---|---|
| `alu_tb` | All operations, wrap-around, 2,000 random operand pairs |
| `register_file_tb` | Reset, both read ports, r15 port, write timing, 3,000 random accesses |
| `program_rom_tb` | All 256 words of the default image; one-cycle read latency |
| `control_unit_tb` | The countdown program, then 40 random programs using every opcode. ROM, registers and ALU are modelled in the testbench. After every instruction: PC, all 16 registers, display value, halt flag, and exactly 3 cycles |
| `bin_to_bcd_tb` | Edge values and 4,000 random values against division by 10 |
| `seg7_decoder_tb` | All 16 codes |
| `seg7_display_tb` | One digit lit at a time, `REFRESH_DIV` cycles per digit, scan order, digit contents |
| `cpu_tb` | The three example programs on three `cpu` instances, with a short refresh period. Checked per instruction against an instruction-level reference model (`tb/cpu_ref_pkg.sv`) through the top-level outputs: PC, LEDs, halt flag, 3-cycle cadence, and every cycle's lit digit. Also requires that each opcode, taken and not-taken branch, each ALU operation, the halt, the scan of all four digits, and the value 55 on the display all occur |
| `cpu_full_tb` | The top with all defaults: Fibonacci for 150,000 instructions (450,000 cycles), enough for several full display scans at the real refresh rate. Under a second in Verilator |

`cpu_tb` and `cpu_full_tb` use `tb/cpu_prog_check.sv`. It drives the reset
and the switches, and steps the reference model whenever the CPU passes from
UPDATE to FETCH.

## Design decisions and limits

These are choices made here, beyond the functional description the design
follows. Most of them are places where the original description says what
an instruction does but not how it is encoded.

* **Field layout.** Only the opcode position (bits 15..13) and the opcode
  values are given. The register, immediate, ALU-code and branch-target
  fields are this design's own.
* **LOAD immediate width.** The original aim was a 12-bit immediate. That
  does not fit in a 16-bit word next to a 3-bit opcode and a 4-bit register
  number, which the same description also requires. Here the word width and
  the register field are kept, and the immediate is 9 bits.
* **Opcode 110** is unassigned and does nothing.
* **ALU result holding.** Latching the operands, so that `save_alu` can come
  any time after `alu`, is this design's interpretation of the `alu` /
  `save_alu` pair.
* **Branch form.** The branch target is an absolute 8-bit address, and the
  branch tests a named register. Both are this design's choices.
* **Behaviour after `end`** (frozen PC, `halted` flag) is a choice.
* **Switch and LED count.** 16 switches and 16 LEDs are a choice. They
  match common Artix-7 boards. The LEDs mirroring the displayed value is
  also a choice.
* **Display.** The digit count of 4 and the decimal display follow the
  behaviour of the original hardware. The refresh rate, segment polarity and
  order, and showing the value modulo 10,000 are choices.
* **CPU clock.** There is no clock divider for the CPU. At 100 MHz the
  Fibonacci program passes 55 in well under a microsecond and then keeps
  going, wrapping at 2^32. To watch it on a board, add a clock enable in
  front of the control unit, or end the program with `end`.
* **Reset.** Reset is synchronous and active high. A board whose reset
  button is active low needs an inverter at the top.

What has been verified: every module passes its own self-checking
testbench. The whole CPU matches an independent instruction-level model on
the three example programs, and the control unit matches it on random
programs. What has not: no FPGA build or timing analysis. The design has
not been checked against any other implementation's machine code, since its
encoding is its own.
