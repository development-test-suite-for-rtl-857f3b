# OMICRON: a self-test core and hardware testbench debugger for an FPGA teaching board

An FPGA board has no permanent processor that could test its own circuit.
OMICRON solves this by loading a test design into the FPGA itself: a small
8-bit PicoBlaze microcontroller runs a test program and reaches every
peripheral of the board (serial port, LCD, LEDs, buttons, IR transceiver,
user I/O header, PS/2 port, SDRAM, SPI flash) through 8-bit I/O ports.
Where a peripheral can feed its signals back, the test decides pass or fail
on its own: user I/O pins are wired in pairs, the IR LED shines onto the IR
receiver, and memories are written and read back.

The same core doubles as a **cycle-accurate hardware testbench debugger**. A
student's module is built into the FPGA next to the core. Its inputs come
from four 8-bit testbench outputs O1..O4 and its outputs return on four
testbench inputs I1..I4. Vectors are applied one clock at a time, either
typed in or streamed from a vector ROM, and I1..I4 are read back after each
step.

This repository holds the SystemVerilog for everything around the
microcontroller. The PicoBlaze core and its test program are not included.
The core's bus is a set of plain ports, so a KCPSM3-compatible core connects
one to one.

## Block diagram

```
               pb_address ──► omi_prog_mem (main / aux / testbench ROM, 3 x 1024 x 18) ──► pb_instruction
                                   ▲ rom_sel
 pb_port_id, pb_out_port,          │
 pb_write_strobe ──► omi_out_reg ×N ──► control, LEDs, LCD, ROM addresses, SPI,
                                        IR enable, user I/O, PS/2, SDRAM pins,
                                        next outputs N1..N4
                                        N1..N4 ──► omi_tb_reg ×4 (tb_strobe) ──► O1..O4 = tb_out
                                                                                   │
                                                     omi_test_module (example) ◄───┘
                                                                   │ I1..I4
 pb_in_port ◄── omi_in_mux ◄── buttons, UART RX queue and status, SPI, data ROM,
                               vector ROM, I1..I4, IR receiver, user I/O,
                               PS/2, SDRAM data
 clk_aux ──► omi_clk_div (÷16, 38 kHz) ──► omi_ir_burst ──► ir_tx
```

## The I/O bus

The PicoBlaze performs an OUTPUT by placing an address on `port_id` and a
byte on `out_port`, and pulsing `write_strobe`. Every output register
(`omi_out_reg`) compares `port_id` with its own address. It loads only when
the address matches *and* the strobe is high; otherwise it holds its value.
Because reads have no side effects for almost every source, `read_strobe`
matters only for the UART receive queue, where it pops the byte just read.

An INPUT places the address on `port_id`, and the core samples `in_port` in
the second clock of the instruction. `omi_in_mux` decodes `port_id` and
registers the selected byte, so `in_port` is valid from that second clock.

The address map lives in `omi_pkg`:

| out port | register | in port | source |
|---|---|---|---|
| 00 | control: [1:0] ROM select, [2] tb_strobe | 00 | buttons [3:0], raw, active low |
| 01 | LEDs | 01 | UART receive data (read pops it) |
| 02, 03 | LCD data; LCD control [0] RS, [1] E | 02 | UART status {tx_full, tx_half, rx_full, rx_half, rx_present} |
| 04, 05 | data ROM address low / high | 03, 04 | SPI receive byte; SPI busy |
| 06, 07 | vector address low / high | 05 | data ROM byte |
| 08..0B | next outputs N1..N4 | 06..09 | vector bytes for O1..O4 |
| 0C | UART transmit (queued) | 0A | vector flags, [0] = last vector |
| 0D | SPI transmit, starts a transfer | 0B..0E | testbench inputs I1..I4 |
| 0E | flash control [0] CS_n, [1] RESET_n | 0F | IR receiver output |
| 0F | IR burst enable | 10..17 | user I/O pins, bytes 0..7 |
| 10..17 | user I/O output bytes 0..7 | 18 | PS/2 [0] data, [1] clock |
| 18 | user I/O direction [0] port A drives, [1] port B drives | 19, 1A | SDRAM data low / high |
| 19 | PS/2 [0] data, [1] clock, [2] data OE, [3] clock OE | | |
| 1A..1E | SDRAM DQ low/high, address low, {DQ OE, BA, A11..8}, command/clock pins | | |

The port numbers and bit layouts are choices of this implementation. The
original assignment is not published. A test program for this core must use
the map above.

## Program memory: three ROMs behind one switch

The PicoBlaze addresses only 1024 instructions, and the test program is
longer than that. The program is therefore split into a main, an auxiliary
and a testbench ROM, each 1024 x 18. All three are read at the same address.
The two-bit `rom_sel` field of the control register picks which one drives
`pb_instruction`, so a routine switches ROMs by writing the control register
and continuing at the intended address. Select 3 reads the main ROM.

The ROMs read zero unless a hex file is named through `MAIN_INIT`,
`AUX_INIT` and `TB_INIT`. The read is synchronous, as in a block RAM.

The data ROM (`omi_data_rom`, 2048 x 8) holds the text the program prints.
It is addressed by two output registers and read through the input MUX.

## Testbench debugger

This is the least obvious part of the design. The difficulty is that the
microcontroller writes one byte per OUTPUT, but all four inputs of the
tested module must change in the same clock. Otherwise the module would see
intermediate input combinations that never occur in the intended test. The
debugger therefore uses two register stages:

1. **Next outputs N1..N4** are ordinary output registers (ports 08..0B).
   The program fills them one at a time. The tested module does not see
   them yet.
2. **Testbench outputs O1..O4** (`omi_tb_reg`) load N1..N4 while the
   `tb_strobe` bit of the control register is high. The program commits a
   cycle by writing the control register with the bit set and then cleared.
   All four registers share that bit, so every output changes on the same
   clock edge.

The tested module's own clock is simply a bit of an output, e.g. O1 bit 0.
A vector that toggles that bit clocks the module, which makes the run
cycle-accurate but not timing-accurate.

### Vector ROM and the end marker

For long runs the vectors come from `omi_vector_rom`. Each ROM is a
512 x 36 block RAM:
- Bits [31:0] hold one cycle of outputs, O1 in the top byte down to O4 in the bottom byte.
- Bits [35:32] are flags.
- Bit 32 is set in the last stored vector, so the program knows where the list ends.

Up to 128 ROMs can be chained, for 65536 vectors. The 16-bit vector address
uses its low 9 bits as the word and its upper 7 bits as the ROM number.
`NUM_VEC_ROMS` sets how many are built. The default is the full 128, which
is 2.4 Mbit. A small FPGA holds only a handful of block RAMs, so for a real
board set it to the number of ROMs the vector list needs: one ROM holds the
example below. Addresses past the last built ROM read zero.

A continuous run repeats, for each vector k:
1. Copy vector k into N1..N4.
2. Read and report I1..I4 (and O, N).
3. Commit with tb_strobe.

Once the marker has been seen, N keeps the last vector. Report k therefore
shows O = vector k-1, together with the tested module's response to it.

### The example tested module

`omi_test_module` is the module used to demonstrate the debugger. It is an
8-bit register with a load enable:
- `reg_ns = load ? (A | B) : reg_ps`;
- `Y = reg_ps & C`.

Its wiring:
- clock = O1 bit 0, load = O1 bit 1, A = O2, B = O3, C = O4;
- I1..I4 = {A|B, reg_ns, reg_ps, Y}.

It is built in when `USE_EXAMPLE_MODULE = 1`, the default. With 0, I1..I4
come from the `tb_in_ext` port and the user's own module is connected to
`tb_out` outside the core. The example's register is cleared asynchronously
by `rst`, because its clock, O1 bit 0, does not run during reset.

`rtl/vector_rom_example.hex` holds the nine vectors of the demonstration
run. O1 alternates 02 and 03, a clock with load held high, while A, B and C
step through 00 / 56 72 D5 / DA 56 9D / F0 0E 3F. The expected report
values are:

| report | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| I1 | 00 | 00 | 00 | 76 | 76 | DE | DE | FE | FE | FE |
| I2 | 00 | 00 | 00 | 76 | 76 | DE | DE | FE | FE | FE |
| I3 | 00 | 00 | 00 | 00 | 76 | 76 | DE | DE | FE | FE |
| I4 | 00 | 00 | 00 | 00 | 54 | 14 | 9C | 1E | 3E | 3E |

`tb_omicron_top` reproduces this table exactly.

## Serial port, SPI flash and IR

- **UART** (`omi_uart_tx`, `omi_uart_rx`):
  - Frames are 8N1, LSB first, at 38400 baud.
  - `omi_baud_gen` makes a 16x bit-rate enable by dividing the 100 MHz clock by 163, which is 0.2 % fast.
  - Each direction has a 16-byte first-word-fall-through queue (`omi_fifo`) with data-present, half-full and full flags.
  - The transmitter sends queued bytes back to back.
  - The receiver starts on a falling edge and samples mid-bit. It drops a frame whose stop bit is low.
- **SPI master** (`omi_spi_master`):
  - Mode 3, MSB first, SCLK = 100 MHz / 8 = 12.5 MHz.
  - A transfer takes 64 clocks. A write to port 0D starts it while `busy` is low.
  - Chip select and reset of the flash are output-register bits, so the program frames commands itself.
- **IR** (`omi_clk_div`, `omi_ir_burst`):
  - The 607.6 kHz auxiliary clock is divided by 16 into a 38 kHz carrier, high for 6 of 16 counts (37.5 %).
  - While port 0F bit 0 is set, bursts of 16 carrier periods alternate with 16-period pauses.
  - The enable is synchronised into the auxiliary clock domain.
  - Checking the received signal is left to the program, which polls the receiver through the input MUX.

## Pins driven directly by the program

The user I/O, PS/2, SDRAM and LCD tests need no dedicated logic. Their pins
are output registers and input-MUX entries, and the program runs the
protocol:
- **User I/O.** 64 pins form two virtual ports of 32. One direction bit per port enables its drivers, while the other port reads the pins with pull-ups.
- **PS/2.** Each line is driven low or released through an output enable.
- **SDRAM.** Every control pin, including the SDRAM clock, is a register bit, so a write-then-read-back test steps the SDRAM by hand.

Bidirectional pins appear as `_out` / `_oe` / `_in` triples; the pads and
pull-ups belong to the board-level wrapper.

## Departures and open points

- The PicoBlaze and the test program (menus, terminal and LCD modes, the
  debugger commands, the SDRAM/flash/IR test algorithms) are not included.
  The end-to-end testbench plays the microcontroller's bus instead.
- The port map, control-bit layout and status-byte layout are this
  implementation's own.
- The end-of-vectors marker is placed in bit 32 of the last word.
- The 37.5 % figure is applied to the carrier's duty cycle, and the 16-period pause between bursts is a choice.
- UART, FIFO and SPI are new implementations with the stated characteristics, not the vendor macros.
- The program, text and vector ROM contents other than the nine
  demonstration vectors are not provided.
- The design has been verified in simulation (the testbenches below) and
  synthesised generically. It has not been placed, timed or run on an FPGA.
  A real build would also lower `NUM_VEC_ROMS` to fit the device's block RAM.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Run them from the repository root, because the default vector ROM file is
named relative to it:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/omi_pkg.sv tb/tb_omicron_top.sv --top-module tb_omicron_top -Mdir obj
./obj/Vtb_omicron_top
```

| testbench | what it covers |
|---|---|
| `tb_omicron_top` | whole core at its default parameters. It runs the bus sequences of every test against models of the board: the debugger run against the table above, ROM switching, data ROM, UART loopback with a full transmit queue and a receive-queue overflow, SPI flash echo, reflected IR, user I/O and PS/2 loops, SDRAM walking ones/zeros and a pseudo-random address stage, LCD, LEDs, buttons. Each mechanism is counted and must occur. |
| `tb_omicron_longrun` | the longest run the debugger supports. All 65536 vector slots are filled with pseudo-random clocked vector pairs for the example module, the marker is on the last one, and every one of the 65537 reports is compared with a reference model. |
| `tb_omicron_external` | the core with `USE_EXAMPLE_MODULE = 0`, driving an external combinational circuit through `tb_out` / `tb_in_ext`. It checks that the outputs hold until the commit, over 200 random vectors, and that ROM select 3 falls back to the main ROM. |
| `tb_omi_out_reg`, `tb_omi_tb_reg` | load only on address match and strobe / only while tb_strobe |
| `tb_omi_prog_mem`, `tb_omi_data_rom`, `tb_omi_vector_rom` | contents (hex files in `tb/`), select, end marker, out-of-range reads |
| `tb_omi_in_mux` | every port against the source struct |
| `tb_omi_fifo` | random push/pop against a queue model, flags |
| `tb_omi_uart_tx`, `tb_omi_uart_rx` | bit time of 2608 clocks, framing, back-to-back frames, 2 % slow sender, framing errors |
| `tb_omi_spi_master` | mode 3 edges, 12.5 MHz, 64-clock transfer |
| `tb_omi_clk_div`, `tb_omi_ir_burst` | ÷16, 6/16 duty, 16-period bursts and gaps |
| `tb_omi_test_module` | the example module against its equations |

To test your own module, set `USE_EXAMPLE_MODULE` to 0, drive it from
`tb_out` and return its outputs on `tb_in_ext`. Then put your vectors in a hex
file of 36-bit words, with bit 32 set on the last one, and name it in
`VEC_INIT`.
