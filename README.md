# A SIC/XE computer on an FPGA

This is a complete small computer built around the SIC/XE architecture, the
teaching machine from Leland Beck's *System Software*. It is written in
synthesizable SystemVerilog for a 50 MHz board with an asynchronous PSRAM
chip, a serial port, switches, buttons, LEDs, a four-digit seven-segment
display, a VGA connector and a PS/2 keyboard port. Programs are not stored on
the board. A personal computer downloads them into memory over the serial
line, and it can start, stop, reset and interrupt the processor. It can also
read memory back while the processor runs.

The design follows the published description of such a system (a diploma
thesis on a SIC/XE processor on a Spartan-3E board). The block structure,
register map, protocol, datapath registers and timing figures come from it.
Everything the description leaves open was chosen here; those choices are
listed in [Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## The machine the programmer sees

- **Memory:** 1 MB, byte addressed with 20-bit addresses. Words are 3 bytes,
  big-endian (most significant byte at the lowest address) and need no
  alignment.
- **Registers:** A, X, L, B, S and T are 24-bit. PC is 20-bit. CC holds the
  result of the last comparison: `00` less, `01` equal, `10` greater.
- **Instructions:** formats 1, 2, SIC, 3 and 4, with immediate, simple and
  indirect addressing, plus PC-relative, base-relative and indexed target
  addresses.
  - An addressing-bit combination outside the standard table is an error.
  - Immediate addressing on a store is an error.
- **STSW** stores CC as a word, with CC in bits 1..0 and zeros above.
- **Not on this hardware:** the floating-point instructions, DIV and DIVR,
  and the system instructions LPS, STI, SSK and SVC. Executing one is an
  error. The I/O-channel instructions SIO, HIO and TIO do not exist either;
  their opcodes `F0`, `F4` and `F8` are used for EINT, DINT and RINT.
- **Errors:** an error does not trap. The processor stops, raises `cpu_error`,
  and the display shows `Err` until the processor is reset.

### Interrupts

The interrupt scheme is simpler than Beck's. There is one interrupt and three
extra registers:

- **I** enables interrupts.
- **IL** receives the interrupted PC.
- **ICC** receives the interrupted CC.

Interrupts are taken only between instructions. If a request arrives while I
is 1, the processor saves PC in IL and CC in ICC, clears I, and loads PC from
the word at `0xffffd`. The handler's address must therefore be stored there.
A request that arrives while I is 0 is dropped, not held.

| instruction | opcode | effect |
|---|---|---|
| `EINT` | `0xF0` | enable interrupts, from the end of the next instruction |
| `DINT` | `0xF4` | disable interrupts at once |
| `RINT` | `0xF8` | PC ← IL, CC ← ICC |

These three opcodes are this design's assignment; the description gives none.
EINT takes effect one instruction late because the datapath has a separate
`IN` register that is copied into I at the next instruction boundary. This
lets a handler end with `EINT; RINT` without being interrupted between the
two instructions.

### Devices

`RD`, `WD` and `TD` address devices by the low byte of the target address.
`TD` always answers "ready" (CC = less).

| address | direction | device |
|---|---|---|
| `0x02` | in | the 8 switches (debounced) |
| `0x03` | in | the 2 general-purpose buttons (debounced), bits 1..0 |
| `0x04` | in | last PS/2 keyboard scan code |
| `0x05` | out | the 8 LEDs |
| `0x06` | out | display mode: bit 1 = left half (digits 3, 2), bit 0 = right half (digits 1, 0); 1 = hexadecimal, 0 = direct |
| `0x07` / `0x08` | out | byte shown in hexadecimal on the right / left half |
| `0x09`–`0x0c` | out | segment patterns of digits 0–3 in direct mode |
| `0x0d` / `0x0e` | out | VGA row (0–29) / column (0–39) |
| `0x0f` | out | colour `RRRGGGBB` of the VGA cell at that row and column |

- Reading any other address returns 0, and writing to it does nothing.
- The switches, the buttons and the keyboard all request the one interrupt:
  - a switch interrupt on any change of a switch;
  - a button interrupt when a button is pressed;
  - a keyboard interrupt for every scan code.
- Direct-mode segment bits are: 0 top, 1 upper left, 2 upper right, 3 middle,
  4 lower left, 5 lower right, 6 bottom, 7 decimal point.

## System structure

```
 serial in ─► uart_rx ─┐                  ┌──────────── cpu_toggle ◄── toggle button
                       ▼                  │ start/stop       │ enable
 serial out ◄ uart_tx ◄ pc_iface ─────────┤                  ▼
                       │ memory port      │ reset, irq ──► sicxe_cpu ◄──► device_subsys ◄─► board I/O
                       ▼  (priority)      │                  │ memory port     │ irq
                    mem_ctrl ◄────────────┼──────────────────┘                 │
                       │                  └── irq OR ◄──────────────────────────┘
                       ▼
                     PSRAM
```

`sicxe_system` is the top level:

- The processor's reset is the board reset OR the host's reset command.
- Its interrupt input is the host's interrupt command OR the device
  subsystem's request.
- `cpu_toggle` holds the processor's run enable:
  - it starts in the stopped state, so a program can be loaded first;
  - the host's start and stop commands set and clear it;
  - each debounced press of the toggle button flips it.
- When enable falls, the processor finishes its current instruction and
  waits. The display then shows `StOP`. It returns to its register contents
  when the processor runs again, and `Err` takes precedence over `StOP`.

## The processor

`sicxe_cpu` is a multicycle, non-pipelined machine: one instruction at a time,
stepped by a state machine.

- **Datapath.** A single 24-bit ALU (`sicxe_alu`) does all arithmetic,
  including PC increments and target-address sums. Its two operands come from
  two multiplexers:
  - operand a: CC expanded to a word, the constant 1, the vector address
    `0xffffd`, A, X, L, B, T2, T3 or PC;
  - operand b: T1, X, PC, IL, TARGET, DEV, the memory data register (as a
    byte or as a word), or one of the instruction's address fields (format 3
    unsigned, format 3 sign-extended, format 4, SIC).
- **Hidden registers.**
  - `RES` holds an ALU result on its way to the register block
    (`sicxe_regfile`: six registers, two read ports, one write port).
  - `T1`–`T3` hold operands.
  - `TARGET` holds the target address.
  - `MEM` and `DEV` are the memory and device data registers.
  - `INSN` collects the instruction bytes.
- **Sequence of one instruction.**
  1. At the instruction boundary, take a pending interrupt or copy IN to I.
  2. Fetch the first byte and decode the format. Fetch the remaining 1–3
     bytes.
  3. For format 3/4/SIC:
     1. Form the target address: displacement, plus PC or B, plus X.
     2. For indirect addressing, read the pointer word.
     3. Read the operand byte or word.
     4. Execute, and write the result back.
  4. Stores write one or three bytes. Device instructions issue a one-cycle
     strobe and collect the answer in the following cycle.
- **Memory port.** The processor's memory port is one byte wide, so a word
  costs three memory operations.
- **Timing.** With the 5-cycle memory, a format-3 load from memory takes
  about 35 cycles: 3 fetch bytes and 3 operand bytes at 5 cycles each, plus
  control steps.
- **Error.** An invalid opcode, register number or addressing mode moves the
  machine to an error state. It stays there until reset.
- **State count.** The control FSM has 29 states. Multi-byte fetches, operand
  reads and stores each reuse one state with a byte counter, instead of one
  state per byte, so it is smaller than a fully unrolled controller (the
  original has more than 50 states).

## Memory controller

`mem_ctrl` serves two masters, the host interface and the processor:

- **Handshake.** Each master raises `rd` or `wr` with an address and holds it
  until `done` pulses. `done` pulses 5 clock cycles after the request.
- **Why 5 cycles.** The PSRAM is used in its asynchronous mode with a 70 ns
  access time. 70 ns is 3.5 cycles at 50 MHz, which rounds up to four access
  cycles plus the cycle that registers the request.
- **Priority.** If both masters request in the same cycle, the host interface
  wins and the processor waits. An operation already in progress is always
  finished first. Because the host accesses memory rarely, the processor
  loses little time. The host can never be locked out by a busy processor.
- **Chip pins.** Only the chip's low byte lane is used. Chip address bits
  22..20, `ram_ub_n`, `ram_adv_n`, `ram_clk` and `ram_cre` are held at
  constant values suited to asynchronous mode.

## Host protocol

`uart_rx` and `uart_tx` run the serial line at 115200 baud:

- 8 data bits, no parity, 1 stop bit.
- 434 clocks per bit at 50 MHz.
- The receiver samples mid-bit and drops frames with a bad stop bit.

`pc_iface` interprets the byte stream:

1. After reset the interface is **locked** and answers every byte with
   `0x58` ("X", rejected).
2. Sending the five characters `SICXE` unlocks it, and it answers `ACK`.
3. Once unlocked, every command byte is answered `0x4b` ("K", accepted) or
   `0x58` (rejected; this also relocks).

| command | meaning | after "K" |
|---|---|---|
| `0x00` | ping | — |
| `0x01` | read memory | host sends address (3 bytes) and count (2 bytes), most significant byte first; board sends count bytes |
| `0x02` | write memory | host sends address, count, then count data bytes |
| `0x10` | reset processor | — |
| `0x11` | start processor | — |
| `0x12` | stop processor | — |
| `0x13` | interrupt processor | — |
| `0xff` | lock | no answer; interface is locked again |

Example: `01 00 01 3c 00 07` reads the 7 bytes at `0x0013c`.

- The state machine's states are named as in the original description:
  LOCKED, KEY_GET1–4, KEY_SEND1–3, PROTO_ERROR, UNLOCKED, CMD_ACCEPT,
  GET_ADDR0–2, GET_COUNT0–1, READ_START/MEM/OUT and WRITE_START/IN/MEM.
- Memory traffic goes one byte at a time through the memory controller.
- There is no time-out. A host that stops in the middle of a command must
  finish it, or reset the board.

## Device controllers

`device_subsys` decodes the device address. It registers read data one cycle
after the read strobe, and ORs the interrupt requests. It contains four
controllers:

- **`gpio_ctrl`**
  - LED register.
  - One `debouncer` per switch and button. An input must stay stable for
    `DEBOUNCE_CYCLES` (default 500,000 = 10 ms) before it is accepted.
  - A one-cycle interrupt pulse on a switch change or a button press.
- **`sevenseg_ctrl`**
  - Six registers: the mode, two hex bytes and four direct patterns.
  - The four digits are multiplexed, each lit for `REFRESH_CYCLES` (default
    50,000 = 1 ms).
  - In hexadecimal mode, a half shows its byte as two digits.
  - The `StOP` and `Err` messages override the registers without changing
    them.
  - Outputs `seg_n` and `an_n` are active low, as on common-anode boards.
- **`vga_ctrl`**
  - A 40×30 frame buffer of 8-bit `RRRGGGBB` cells, written through the
    row/column/colour registers.
  - Shown on a standard 640×480 60 Hz screen. Each cell is a 16×16 block of
    pixels, and the 25 MHz pixel rate comes from a clock enable.
  - The frame buffer has one write port and one synchronous read port, so it
    maps onto block RAM.
  - Colour and sync outputs are registered together, one clock behind the
    counters.
  - Writes outside the grid are ignored.
- **`ps2_ctrl`**
  - Samples the keyboard's clock and data through synchronisers, and shifts
    in the 11-bit frame on falling clock edges.
  - Keeps the code only if start, stop and odd parity are correct. Each kept
    code raises the interrupt.
  - Scan codes are passed on raw: break codes (`F0 xx`) arrive as two
    interrupts.

## Where this design makes its own choices

The source description fixes the architecture, the register map, the
protocol and the timing figures. Below is what it leaves open or gets wrong,
and how this design handles it.

- **Interrupt opcodes and delayed enable.** EINT/DINT/RINT are `F0`/`F4`/`F8`.
  EINT is delayed by one instruction through the IN register.
- **Requests while disabled are dropped.** The description says requests are
  ignored while interrupts are disabled. They are not queued.
- **Display mode example.** The description's example writes `0x03` to make
  the left half hexadecimal and the right half direct. Its own explanation of
  the bits ("bit 1 set, bit 0 not set") gives `0x02`. This design follows the
  bit meaning, so `0x02` is correct here.
- **Acknowledgement byte.** One sentence calls `0x58` the acknowledgement.
  Everywhere else `0x4b` is "accepted", and that is used.
- **Lock command.** The lock command `0xff` gets no reply.
- **Field order.** Count and address fields are big-endian, as the example
  byte sequence shows.
- **Timing constants.** Debounce time, refresh rate and VGA timing are not
  given; common values are used.
- **Start-up and display precedence.** The processor starts stopped, and
  `Err` wins over `StOP`.
- **TD.** TD always reports ready.
- **STSW.** The original datapath has a CC input on the ALU but names no
  instruction that uses it. Here STSW uses it, with CC in bits 1..0 of the
  stored word.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. All
of them pass.

| testbench | what it checks |
|---|---|
| `tb_sicxe_alu` | every operation against a reference model, on corner and random values (6720 checks) |
| `tb_sicxe_regfile` | random reads and writes against a model |
| `tb_sicxe_cpu` | **Program 1:** the assembler's example program, a sum loop whose result is 74.<br>**Program 2:** exercises every addressing mode, MULR, a TIXR loop, SHIFTL, LDCH/STCH, JSUB/RSUB, conditional jumps, STSW, RD/WD (each device strobe must last one cycle), and an interrupt whose RINT must restore CC.<br>**Also:** suspend/resume, and the two error cases. |
| `tb_mem_ctrl` | the 5-cycle latency against a PSRAM model with a 70 ns access time, host priority, and back-to-back requests |
| `tb_uart_rx`, `tb_uart_tx` | frame timing, and reception at the nominal and at a slightly slow baud rate |
| `tb_pc_iface` | locking and unlocking, the read/write example, all commands and error paths |
| `tb_cpu_toggle`, `tb_gpio_ctrl`, `tb_ps2_ctrl`, `tb_sevenseg_ctrl`, `tb_vga_ctrl`, `tb_device_subsys` | each device's register behaviour and timing; expected segment patterns are built from segment letters |
| `tb_sicxe_system` | the whole computer at its default parameters (see below) |

`tb_sicxe_system` drives the serial line like a host program would. It:

1. is rejected while the interface is locked, then unlocks it;
2. downloads a main loop, an interrupt handler and the interrupt vector, and
   reads them back;
3. starts the processor and reads memory while it runs;
4. raises interrupts from the switches, the keyboard and the host;
5. stops and restarts the processor with the button;
6. stops it from the host, then runs an illegal opcode and checks that `Err`
   appears;
7. resets the processor and locks the interface.

It counts twenty mechanisms and fails if any of them never occurred. The
mechanisms include:

- host arbitration conflicts in the memory controller;
- `StOP` and `Err` on the display;
- each interrupt source;
- LED, digit and VGA writes.

At the default parameters (115200 baud, 10 ms debounce) it simulates 89 ms
of board time in a few seconds.

`tb/psram_model.sv` is a behavioural model of the memory chip. It has 1 MB of
byte storage and returns `0xee` until 70 ns after the address and control
lines settle, so a controller that samples too early reads wrong data.

## Simulating

Verilator 5 is enough. From the project root, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sicxe_pkg.sv \
  tb/psram_model.sv tb/tb_sicxe_system.sv --top-module tb_sicxe_system
./obj_dir/Vtb_sicxe_system
```

- Block testbenches build the same way: give the package, the block's file,
  its helpers (`-y rtl` finds them) and the testbench.
- Some block testbenches lower `DEBOUNCE_CYCLES`, `REFRESH_CYCLES` or
  `CLKS_PER_BIT` to keep runs short.
- The top-level parameters are `CLKS_PER_BIT` (434), `ACCESS_CYCLES` (4),
  `DEBOUNCE_CYCLES` (500000) and `REFRESH_CYCLES` (50000). Change them when
  the board clock or the memory chip differs.
