# A microcoded 8-bit CPU built from GALs and TTL

This is a small homebrew computer: an 8-bit CPU with a 24-bit (16 MB) address
space. It has a boot ROM, up to four 512 KB RAM banks, a character LCD and a
USB FIFO module. There is no CPU chip. The processor is made from:

- a dozen GAL22V10/GAL20V8 programmable logic devices;
- two 74181 ALU slices and a handful of 74LS decoders, buffers and latches;
- three flash chips holding the microcode.

Every instruction is a short sequence of 24-bit microwords. Each clock cycle,
one microword directly drives every load strobe, bus enable and ALU control
in the machine.

The SystemVerilog here models the board chip by chip. Each GAL is one module
whose logic is taken from its equations. Each TTL or memory part is a small
model of its datasheet function. Each schematic sheet is a module that wires
those parts together. The top, `cpu_top`, joins the sheets by their net names.

## Clock: two phases, four quarters

The CPU clock is two square waves of the same frequency, Q0 and Q1, with Q1
lagging Q0 by 90 degrees. Every register in the machine loads on the rising
edge of Q0. The two phases split each cycle into four quarters. Write pulses
(memory `/WE`, USB `WR`, USB `/RD`) are gated to the last quarter, where Q0
and Q1 are both low. So address and data have settled for three quarters
before a write starts, and the write ends before anything changes.

In the RTL, `clock_reset` makes Q0 and Q1 from a 2-bit Johnson counter on a
master clock `clk` that runs four times faster than the CPU. The quarters in
order are (Q0,Q1) = 10, 11, 01, 00.

Registers do not use Q0 as a clock. Every flip-flop runs on `clk` and updates
only when `ce` is high. `ce` is high during the 00 quarter, so the update
happens on the master edge where Q0 rises. One CPU cycle is four `clk`
cycles.

The reset button goes through a two-flop synchroniser. The control GAL then
registers it once more, so reset changes only on a cycle boundary.

## The control store

### Microcode address

The three microcode flashes (29F010, 128K x 8 each) share one 17-bit
address:

```
uaddr = { opcode[7:0], phase[3:0], /V, /Z, N, /C, /CARRY_A }
```

- **opcode** comes from the opcode register.
- **phase** is a 74LS163 counter. It counts cycles within the instruction.
- **The five flags** come last: the four ALU condition codes and the stored
  address carry. Their stored polarity is used as is.

Because the flags are address bits, the microcode branches by storing
different words at the addresses for different flag values; there is no
branch logic. A conditional jump, for example, has words that load the PC
at one value of /Z, and words that only skip the operand at the other.

### Microword

| ROM  | bits 7..0 |
|------|-----------|
| ROM2 | `lsel[1:0]` left operand, `rsel[1:0]` right operand, `load[2:0]` destination, `load3` |
| ROM1 | `alu_func[3:0]` (74181 S3..S0), `alu_mode` (M), `alu_cin` (Cn), `cc_s0`, `cc_s1` |
| ROM0 | `cntsel[1:0]`, `asel[1:0]`, `/CNTSP`, `SPDIR_IEDATA`, `/DRALU`, `/LDOP` |

The layout is the packed struct `cpu_pkg::uword_t`. The encoded fields are
expanded by decoders, so at most one source drives each bus by construction:

- `lsel` (74LS139): left ALU bus = zero, X, Y-or-X7, or A.
- `rsel` (74LS139): right ALU bus = address-bus bank, high or low byte, or T.
- `load3` picks one of two 74LS138s:
  - LOAD1 (`load3` = 1): memory write, SPLO, T, Y, X, A.
  - LOAD0 (`load3` = 0): SPHI, SPBANK, ARLO, ARHI, ARBANK, PCLO, PCHI, PCBANK.
  - Code 7 with `load3` = 1 loads nothing.
- `cntsel` (74LS139): count PC, count AR, or load the interrupt-enable flag.
- `asel` (74LS139): which of PC, AR or SP drives the address bus.
- `/DRALU` puts the ALU result on the data bus. Otherwise the memory side
  drives it: a memory read.

### Ending an instruction

`/LDOP` ends an instruction. On that edge the opcode register loads the next
opcode from the memory bus, and the phase counter restarts at 0. The fetch
word also sends PC to the address bus, so that next opcode is the byte at PC.

Incrementing PC is left to the microcode. Typically the first word of every
instruction counts PC.

## Data paths

### Data registers and the two operand buses

A, Y and T are GAL20V8 registers with three-state outputs:

- A and Y drive the left operand bus.
- T drives the right operand bus.

X is a 74LS377 whose outputs are always on. X reaches the left bus only
through the `xorx7or0` GAL, which outputs one of:

- X itself;
- X7: bit 7 of X copied into all eight bits, which is X's sign extension;
- zero.

The right bus can also take any byte of the current address bus through three
74LS244s. This is how PC, AR and SP bytes get into the ALU.

### The shared Y / X7 select, and address arithmetic

The microword has only four left-operand codes, but five left sources: zero,
X, Y, X7 and A. The control GAL resolves code 2 from the destination:

- If the destination is an address-register byte (`load3` = 0), code 2 means
  **X7**.
- Otherwise it means **Y**.

This makes the 24-bit sum "address + sign-extended X" take one microword per
byte:

```
ARLO   <- ADRLO   + X        (carry out saved)
ARHI   <- ADRHI   + X7 + c   (X7 = 00 or FF)
ARBANK <- ADRBANK + X7 + c
```

The carry from the high byte into the bank byte is the `CARRY_A` flip-flop in the control GAL. It
captures the ALU carry-out only when code 2 is selected and `load3` = 0, that
is, exactly on the X7 steps. `CARRY_A` is also an address bit of the
microcode. The microcode therefore uses two copies of the next word, one per
carry value. Each copy sets the 74181 carry-in to match.

The low byte uses code 1 (plain X), which leaves `CARRY_A` alone. Its carry
is kept in the C flag instead, by loading the condition codes on that step.
C is a microcode address bit too, so the high-byte word picks its carry-in
from C, and the bank-byte word picks its carry-in from `CARRY_A`.

SPLO is loaded through the LOAD1 bank. A code-2 operand is therefore Y when
SPLO is the destination, and `CARRY_A` is not loaded.

### Address registers

PC, AR and SP are 24 bits each, made of three byte-wide GAL22V10 counters
chained by active-low carries:

| register | per byte |
|----------|----------|
| PC | synchronous reset to 0, load, count up |
| AR | load, count up |
| SP | load, count up (`SPDIR` = 1) or down (`SPDIR` = 0); carry or borrow passes to the next byte |

Loads take the data bus, so an address byte can come from memory or from the
ALU. The PC also drives the address bus while reset is held. The first opcode
is therefore read from address 000000, and it is loaded into the opcode
register during reset.

### ALU and condition codes

Two 74181 slices form an 8-bit ALU with ripple carry. The function select,
mode and carry-in come straight from the microword. The carry polarity is the
74181's own: active-low carry in the active-high data convention. So `A+B` is
function 1001 with Cn = 1, and `A-B` is 0110 with Cn = 0.

The `alucc` GAL holds the four flags:

- C (stored inverted);
- N;
- Z (stored inverted);
- V (stored inverted).

Two microword bits choose the flag operation:

| S1 S0 | operation |
|-------|-----------|
| 00 | hold |
| 11 | load from the ALU (see below) |
| 10 | shift right: C<-N, N<-Z, Z<-V, V<-bit 3 of X |
| 01 | shift left: V<-Z, Z<-N, N<-C; the stored /C bit becomes 0 (carry set) |

The shifts move the stored levels: inverted and true flags pass into each
other's positions unchanged.

The load takes:

- C from the carry-out;
- N from F7;
- Z from F = 0;
- V from the operand and result sign bits. Whether the operation was an
  addition or a subtraction is read from bit 1 of the ALU function.

The shifts move flags through the four flag positions of the microcode
address. The right shift also loads X[3] into V. This is how a program's
flag byte is restored: shift it in from X one bit at a time.

## Interrupts

A single flip-flop, /IE, holds the interrupt enable:

- Reset disables interrupts.
- `cntsel` = "load IE" copies the shared microword bit `SPDIR_IEDATA` into
  /IE.

The opcode register does the rest. At `/LDOP`, if /IRQ is low and interrupts
are enabled, it loads **opcode 00** instead of the memory byte. The
microcode for opcode 00 is the interrupt entry sequence.

PC is counted only by the microcode, so the entry sequence can leave PC
pointing at the instruction that was not executed, and save it. The only interrupt source on this
board is the USB module's "receive data available" flag, registered once so
that it changes only on a cycle boundary.

## Memory system

### Memory map

The address decoder GAL sees A23..A8:

| range | select |
|-------|--------|
| 000000-003EFF | boot ROM (29F010; only 15.75 KB of it is decoded) |
| 003F00-003FFF | device page: 16 slots of 16 bytes, decoded by a 74LS138 on A7..A4 |
| 004000-07FFFF | RAM bank 0 (628512; its first 16 KB are hidden behind ROM and devices) |
| 080000-0FFFFF | RAM bank 1 (628512) |
| 100000-17FFFF | RAM bank 2 (select only; not fitted) |
| 180000-1FFFFF | RAM bank 3 (select only; not fitted) |

Device slots in the device page:

| address | device |
|---------|--------|
| 003F00 | LCD |
| 003F10 | USB module |

### The bus transceiver

Memory and devices sit on a separate memory bus. A 74LS245 joins it to the
CPU data bus.

- For a write (`/LDMEM` low), the data bus drives the memory bus. `/WE`
  pulses in the last quarter.
- Otherwise memory output is enabled and the memory bus drives the data bus,
  unless the ALU is driving the data bus.
- The opcode register reads the memory bus directly, so an instruction fetch
  does not need the transceiver.

## Devices

### LCD

A write to 003F00/003F01 has three steps:

1. The byte is latched into a 74LS377 and RS is set to the inverse of A0.
2. On the next cycle `LCD_RUN` is high.
3. The LCD's E is high for the last three quarters of that cycle.

So 003F00 is the data register and 003F01 the command register. The LCD is
write-only, so software must wait out the display's command times: about
1.52 ms for clear/home and 41 us for other writes.

### USB module

| access | effect |
|--------|--------|
| write 003F10 | pulses `WR` in the last quarter |
| read 003F10 | pulses `/RD` in the last quarter; the module puts its byte on the memory bus |
| read 003F11 | status: bit 0 = /RXF, bit 1 = /TXF, bit 2 = /PEN |

## Module map

| module | part(s) modelled |
|--------|------------------|
| `cpu_pkg` | microword and control-strobe types, field encodings |
| `cpu_top` | the whole board |
| `clock_reset` | Q0/Q1 generator, reset synchroniser |
| `control_unit` | control-module sheet: microcode ROMs, decoders, opcode and phase |
| `opcode_reg`, `control_gal` | the OPCODE and CONTROL GALs |
| `phase_counter` | 74LS163 |
| `decoder_139`, `decoder_138` | 74LS139, 74LS138 |
| `data_registers` | data-register sheet |
| `data_reg` | A/Y/T GAL20V8 |
| `reg_377` | 74LS377 (X, LCD latch) |
| `xorx7or0` | X/X7/zero GAL |
| `address_registers` | address-register sheet |
| `pc_lohi`, `pc_bank`, `ar_reg`, `sp_reg` | the byte counters |
| `alu` | ALU sheet |
| `alu181` | 74181 slice |
| `alucc` | condition-code GAL |
| `memory_system` | memory sheet |
| `addr_decode` | decoder GAL |
| `flash_29f010` | flash read model |
| `sram_628512` | SRAM |
| `hardware_devices` | device sheet |
| `device_gal` | device GAL |

Three-state buses are modelled without `z`. Each driver produces a value and
an active-high enable, and a bus is the OR of its enabled drivers. An
undriven bus reads 0, and assertions check that no two drivers are on at
once. The bidirectional memory bus is split into its read side and its
write side, so there are no combinational loops.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself after a fixed number
of cycles if something hangs.

Build and run one with plain Verilator 5 from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/cpu_pkg.sv \
    $(ls rtl/*.sv | grep -v cpu_pkg) tb/tb_cpu_top.sv \
    --top-module tb_cpu_top -Mdir obj_cpu_top -o sim
./obj_cpu_top/sim
```

To run another bench, replace `tb_cpu_top` with its name.

`tb_cpu_top` runs the complete board with every parameter at its default. No
microcode came with the design, so the bench builds its own small test
instruction set in SystemVerilog and writes it into the three microcode
ROMs. It also writes a test program into the boot ROM. The instruction set
covers:

- immediate loads, add and subtract;
- load and store through AR, with auto-increment;
- push and pull through SP;
- a flag-conditional jump;
- enabling interrupts;
- AR plus sign-extended X;
- the flag shifts.

The program runs for 141 CPU cycles. Along the way it:

- writes and reads RAM;
- writes the LCD;
- writes a byte to USB, polls the USB status and reads a byte from USB;
- takes a USB receive interrupt.

The bench checks the register and memory results. It also counts each
hardware mechanism (branch taken and not taken, SP carry across bytes, X7
address carry, flag shifts, interrupt entry, and so on) and fails if any
never happened. This test instruction set shows the hardware works; it is
not the original machine's instruction set.

For a real program, supply the microcode and boot ROM contents as `$readmemh`
files through `cpu_top`'s `UROM0_FILE`..`UROM2_FILE` and `BOOTROM_FILE`
parameters. ROM2 holds microword bits 23..16, ROM1 bits 15..8 and ROM0
bits 7..0.

## What follows the original design, and what does not

**Taken from the original design:**

- the logic of every GAL;
- the part list;
- the sheet-to-sheet connections;
- the memory map and device page;
- the microcode address composition;
- the decoder output assignments;
- the two-phase clock with write strobes in the last quarter.

**Choices and readings made here:**

- **Clock generator.** The oscillator and reset circuit of the original
  are not reproduced. The 4x master clock, Johnson counter and
  synchroniser are this design's own.
- **Bit order inside the microcode ROMs.** Which microword field sits on
  which data bit of which ROM, and the order of the flag bits in the
  address, is one reading of the control schematic. It only matters when
  loading microcode written for the original board.
- **Interrupt-enable flip-flop.** The flip-flop holds its value between
  `load IE` cycles. As literally written, the original equation would
  re-enable interrupts on any cycle without that strobe. The hold was added
  because the flag is described as stored state.
- **Stack pointer counter.** It is a plain 8-bit up/down counter with
  carry/borrow out. A few product terms of the original SP equations do not
  fit an up/down counter and are treated as errors.
- **Interrupt sources.** The device GAL is described as ORing several
  interrupt lines, but its equation (and this RTL) uses only the USB
  receive flag. The second interrupt input on the device sheet is left
  unconnected.
- **Memory parts.** The flash model is read-only: no program/erase command
  set. The SRAM writes on the master clock while `/CS` and `/WE` are low.
  Neither models access times.
- **Buses.** Three-state buses are modelled as described above. The data-bus
  input buffer in front of the address registers is a direct connection.
- **External parts.** The USB module, the LCD, the USB connector and the
  analog parts (contrast pot, backlight resistor, capacitor) are not
  modelled in `rtl/`. Their signals are ports of `cpu_top`. `tb_cpu_top`
  contains simple behavioural stand-ins for the USB FIFO and the LCD.

## How far it has been checked

Each GAL module has been checked against its own equations:

- exhaustively, where the inputs allow;
- otherwise with random stimulus, against reference models written
  separately in the testbenches.

The 74181 model is checked against all 32 functions for every operand pair.
The sheet modules are checked with directed and random sequences. The whole
board is checked by the end-to-end program described above. Timing (setup,
propagation, LCD command times) is not modelled.
