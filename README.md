# An 8-bit breadboard CPU in SystemVerilog

This is RTL for a small 8-bit computer. It was first built from 74LS-series TTL chips on
breadboards, and everything in it hangs off a single shared 8-bit bus. Each module takes one of
three roles:

- it puts a value on the bus;
- it takes a value from the bus;
- it does both, at different times.

A microcoded control unit decides every clock cycle which module drives the bus and which modules
latch it. The machine has:

- an A and a B register;
- an 8-bit adder/subtractor;
- 16 bytes of RAM that hold both program and data;
- a 4-bit program counter;
- an instruction register;
- a carry/zero flags register;
- a decimal display that shows numbers as unsigned or signed.

It is small, but it is Turing complete. It has conditional jumps, and programs can change memory.

The RTL keeps the original machine's structure, signal names and timing model. Tri-state buses,
active-low chip pins and EEPROM images are replaced by their synchronous, active-high equivalents.
The last section lists every place where the RTL departs from the hardware or fills a gap.

## The bus and who talks on it

```
              +---------------- 8-bit bus ----------------+
 PC (4 LSB) <-> CO out / J in                    AO out / AI in  <-> A register --+
 MAR  <-  MI (4 LSB)                             EO out          <-  ALU  <-------+--- B register
 RAM  <-> RO out / RI in                         BI in           ->  B register
 IR   <-> II in (8 bits) / IO out (4 LSB)        OI in           ->  output register -> display
```

| Bus driver | Enable | Value |
|---|---|---|
| A register | `AO` | A |
| ALU | `EO` | A + B, or A − B when `SU` |
| RAM | `RO` | word at the MAR address |
| instruction register | `IO` | `{4'b0000, IR[3:0]}` (operand) |
| program counter | `CO` | `{4'b0000, PC}` |

The B register also has an output enable, but no control signal drives it, so it is tied off.
`bus_mux` ORs the enabled drivers together. When no driver is enabled the bus reads 0. An
assertion in `bus_mux` fires if two drivers are enabled at the same clock edge. That is the rule
the tri-state hardware depends on.

## Instructions

An instruction is one byte. The upper nibble is the opcode. The lower nibble is a RAM address or a
4-bit immediate. The program counter and the RAM address are 4 bits, so a program plus its data
fits in 16 bytes.

| Opcode | Mnemonic | Effect |
|---|---|---|
| 0000 | NOP | nothing |
| 0001 | LDA a | A ← M[a] |
| 0010 | ADD a | B ← M[a]; A ← A + B; flags |
| 0011 | SUB a | B ← M[a]; A ← A − B; flags |
| 0100 | STA a | M[a] ← A |
| 0101 | LDI n | A ← n (0..15) |
| 0110 | JMP a | PC ← a |
| 0111 | JC a | PC ← a if the carry flag is set |
| 1000 | JZ a | PC ← a if the zero flag is set |
| 1001 | ADI n | B ← n; A ← A + B; flags |
| 1010 | SUI n | B ← n; A ← A − B; flags |
| 1011 | OAH a | output M[a], then halt |
| 1100, 1101 | — | free; they behave as NOP |
| 1110 | OUT | output A |
| 1111 | HLT | stop the clock |

Subtraction adds the two's complement of B: B is inverted and a 1 enters the adder's carry input.
After SUB or SUI the carry flag therefore means "no borrow" (A ≥ B unsigned), and is 0 when the
result went negative. The flags change only on ADD, SUB, ADI and SUI.

## How an instruction executes

This is the part that needs care when you change anything.

Every instruction takes exactly **five CPU clock cycles**, called steps 1 to 5. In each step the
control logic drives a 16-bit control word. Its bits, MSB first, are:

`HLT MI RI RO IO II AI AO | EO SU BI OI CE CO J FI`

This is the order of the original machine's control LEDs. The first byte comes from one control
EEPROM and the second byte from the other. The struct `cpu_pkg::ctrl_t` holds this word.

| Step | Signals |
|---|---|
| 1 (fetch) | MI CO — the MAR takes the PC |
| 2 (fetch) | RO II CE — IR ← M[PC], PC increments |
| 3..5 | depend on the opcode (and flags), see `rtl/microcode_rom.sv` |

For example, ADD runs `IO MI`, then `RO BI`, then `EO AI FI`. OAH runs `IO MI`, `RO OI`, `HLT`.
JC runs `IO J` in step 3 only if the stored carry flag is 1; otherwise steps 3 to 5 are empty.
Short instructions still use all five steps. The step counter always wraps after step 5.

**Timing model.** The whole machine is clocked on the rising edge of one clock, `cpu_clk`.

- The step counter, opcode and flags are registers.
- The control word is a combinational lookup (the EEPROM) of those registers. It is therefore
  stable for the whole cycle.
- At the rising edge that ends a step, every register whose "in" signal is active latches the bus.
  The step counter advances on the same edge.

So the bus transfer of step *n* and the move to step *n+1* happen together. A control signal
decoded in step 2 acts at the end of step 2. For example, `II` loads the opcode, and step 3 already
decodes with the new opcode. The original build does not say on which edge its step counter
advances; putting everything on one edge is this design's choice.

**Flags.** `FI` is asserted only in the step where the ALU result is written into A. The carry
and zero flags are captured at that same edge, from the ALU carry-out and from a NOR of the ALU
result, which is exactly the value A receives. The flags then address the control EEPROMs, so the
flags stored by an ADD are what a following JC or JZ tests.

**Halt.** `HLT` gates the clock off in `clock_logic`. Once a HLT step is decoded, `cpu_clk` stays
low: no further edges happen and the machine stays in that step until reset. A halting HLT takes
2 cycles; a halting OAH takes 4 cycles.

Control EEPROM address (both parts): `A2..A0` step, `A6..A3` opcode, `A7` carry flag, `A8` zero
flag; `A9..A10` are unused. The contents are computed by a SystemVerilog function when the memory
is initialised. The table in the header of `rtl/microcode_rom.sv` is the whole microprogram.

## Clock

`clock_logic` implements `((clk_auto & sel_auto) | (clk_manual & ~sel_auto)) & ~hlt`:

- **automatic mode** passes a free-running clock (the original reaches about 0.25 Hz–450 Hz);
- **manual mode** passes a debounced push-button, one pulse per press, for single stepping.

The oscillator and the debouncers were RC timer circuits. They are outside the RTL: their outputs
are the top-level inputs `clk_auto`, `clk_manual` and `sel_auto`. Drive them from your own clock
generator or from a testbench.

## Program mode and run mode

Programs are entered by hand.

1. Set `prog_mode = 1`. This selects the RAM's program-mode inputs:
   - the address comes from `prog_addr` (a 4-way DIP switch);
   - the data comes from `prog_data` (an 8-way DIP switch);
   - the write strobe comes from `prog_write` (a button).
2. Each rising edge of `prog_write` writes one byte. The selectors are 2-to-1 multiplexers
   (`prog_run_select`), one per signal group.
3. Set `prog_mode = 0` for run mode. The RAM is now addressed by the MAR and written from the bus
   on the CPU clock edge when `RI` is set.

While `prog_mode` is 1, the sequencer, the program counter and the registers are held in reset.
Leaving program mode therefore starts execution at address 0 with step 1. The output register is
reset only by `rst`, so the last result stays displayed while a new program is entered.

The RAM contents are not reset.

## Output display

The output register latches the bus on `OI`. The display shows it as three decimal digits plus a
sign on four multiplexed seven-segment displays:

- `display_scan` counts 0..3 on its own clock, `disp_clk` (a few kHz in the original). It decodes
  the count to one active-low cathode, `dig_n`.
- `display_rom`, a 2048×8 EEPROM image, maps an address to the segments `seg`. The address is
  `{signed_mode, digit, value}`: `A10` is the mode, `A9..A8` the digit, `A7..A0` the number.
- Digit 0 is the ones digit, 1 the tens, 2 the hundreds, 3 the sign.
- The segment bits are `seg[0]` = a … `seg[6]` = g; `seg[7]` is unused.

Unsigned mode shows 0..255 with leading zeros. Signed mode shows −128..127; the sign digit lights
segment g for a negative number and is blank otherwise. For example, 123 gives `4F 5B 06 00` on
digits 0..3.

## Files

| File | Block |
|---|---|
| `rtl/cpu_pkg.sv` | opcodes, control-word struct, bus-driver slots |
| `rtl/cpu_top.sv` | the whole machine |
| `rtl/clock_logic.sv` | clock select and halt gate |
| `rtl/control_logic.sv` | step counter + two control EEPROMs + flags |
| `rtl/step_counter.sv`, `rtl/microcode_rom.sv`, `rtl/flags_register.sv` | its parts |
| `rtl/gp_register.sv` | A and B registers |
| `rtl/instruction_register.sv` | IR |
| `rtl/alu.sv`, `rtl/adder4.sv` | adder/subtractor from two 4-bit adders |
| `rtl/memory_unit.sv` | MAR, program/run selectors, RAM |
| `rtl/memory_address_register.sv`, `rtl/prog_run_select.sv`, `rtl/ram16x8.sv` | its parts |
| `rtl/program_counter.sv` | PC |
| `rtl/output_module.sv` | output register + display scan + display EEPROM |
| `rtl/output_register.sv`, `rtl/display_scan.sv`, `rtl/display_rom.sv` | its parts |
| `rtl/bus_mux.sv` | the bus |

`cpu_top` has no parameters. It brings out these signals:

- the bus;
- every register;
- the step, one-hot step and control word (the indicator LEDs);
- the RAM address and data;
- the gated clock.

## Simulating

Every testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`. With Verilator
5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/cpu_pkg.sv tb/cpu_top_tb.sv \
          --top-module cpu_top_tb --Mdir obj -o sim && obj/sim
```

Replace `cpu_top` with any block name to run that block's testbench (`tb/<block>_tb.sv`).

`tb/cpu_top_tb.sv` loads each program through program mode and reads it back. It then runs the
program and compares every value written to the output register with an instruction-level model
inside the testbench. It also checks the halt and the exact number of clock cycles (five per
instruction). The programs are:

- **multiply**: X·Y by repeated addition and subtraction of 1, with JC as the loop test. Six
  factor pairs with products below 256 are run, including 5·7 = 35 and a zero factor; each run
  halts with the product displayed;
- **Fibonacci**: 0, 1, 1, 2, 3, 5, …, 233, after which the carry restarts it;
- **powers of two**: 1 … 128, after which the carry restarts it;
- **a mixed program**: covers LDI, ADI, SUI, JZ taken and skipped, NOP, a free opcode, STA, OAH
  and a negative result shown in signed mode. Its first 12 cycles are single-stepped through the
  manual clock.

The testbench counts each mechanism and fails if one never happens:

- program-mode writes;
- halts, and the clock staying stopped after a halt;
- JC and JZ, each both taken and skipped;
- subtraction;
- manual clocking;
- the minus sign;
- every bus driver;
- every opcode except one of the two free ones.

The unit testbenches compare against independent references:

- `alu_tb`: all 2¹⁷ input combinations against integer arithmetic;
- `microcode_rom_tb`: all 2048 addresses against the instruction table written as lists of signal
  names;
- `display_rom_tb`: all 2048 words, with digits found by repeated subtraction;
- the registers, PC and RAM: random sequences checked against tracked models.

The whole set runs in seconds.

## Where this RTL departs from the breadboard machine or fills a gap

- **Bus**: the tri-state transceivers are replaced by a multiplexer. When the bus is undriven it
  reads 0 here; in the hardware it floats. When the instruction register drives the bus, the
  upper four bits are 0.
- **Polarity**: every enable is active high. The original inverts 11 of its 16 control signals to
  suit active-low chip pins. That stage has no counterpart here.
- **Zero flag**: the original describes the zero detect as looking at the A register. Here it looks
  at the ALU result in the step where FI is set. That is the value A is loading at the same edge,
  so JZ tests the result of the last arithmetic instruction. Looking at A's old contents would
  make it test the one before.
- **Conditional jumps**: JC/JZ perform `IO J` in step 3 when the flag is set, and nothing
  otherwise.
- **Free opcodes**: 1100 and 1101 are NOPs.
- **Reset**: the original ties the register clear inputs low and describes no reset. Here an
  asynchronous `rst` clears every register, the step counter and the display counter. Program
  mode also holds the CPU in reset.
- **RAM write strobe**: in run mode it is the CPU clock qualified by RI; in program mode it is the
  write button. Both are chosen by a selector. This is a clock multiplexer, kept because it is how
  the hardware writes memory. The RAM reads asynchronously.
- **RAM data polarity**: the original 16x4 RAM chips output the complement of what was written,
  and a row of inverters restores it. The net effect is a plain memory, and that is how it is
  modelled.
- **Display**:
  - Leading zeros are shown.
  - The minus sign is segment g.
  - The segment order (a = bit 0) is inferred from the patterns for the digits 3 and 2.
- **Step counter**: it has 3 bits and a one-hot 3-to-8 decode for the step LEDs, and wraps after
  five steps. The hardware has room for eight steps.
- **Not in the RTL**: the RC timers (CPU clock, button and switch debouncers, display clock), the
  power supply, the pull-up resistors, the LEDs and the seven-segment displays themselves. Their
  logic-level signals are ports of `cpu_top`.
