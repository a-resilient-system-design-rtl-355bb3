# Resilient boot fabric for a RISC-V system-control subsystem

A multi-processor chip is only as usable as its boot path. If the one ROM, flash
interface or loader it relies on is broken on silicon, the whole chip is lost.
This design is the boot fabric of a small RISC-V control processor (an Ibex-class
core, kept outside this RTL) that brings up such a chip. It gives four independent
ways to get a program running. Each mode uses a different set of hardware, so a
fault in any one part can be routed around:

| Boot mode | What runs | Hardware it needs besides CPU and bus |
|---|---|---|
| SDIO | ROM code copies an image from an SD card (SD bus protocol) into SRAM, then jumps to it | bootROM, SDIO register interface, SRAM |
| SPI | ROM code talks to the same kind of card in SPI mode. Every byte goes through the DMA | bootROM, DMA, SPI master, SRAM |
| External | The CPU's reset address points straight into the SD card. A hardware state machine makes the card look like memory | SDIO register interface only (no ROM, no SRAM) |
| JTAG | A debug host halts the CPU, writes SRAM over the bus, sets the PC and resumes | JTAG transport, debug module, SRAM |

The CPU and the peripheral bus are the only parts that every mode shares. If the
bootROM is dead, the external and JTAG modes still work. If the SD interface is
dead, SPI and JTAG still work. If every automatic mode fails, the ROM code ends
in an endless loop, which leaves the CPU in a quiet state that the debugger can
take over.

## Structure

```
                 cpu_instr  cpu_data        DMA          debug module (SBA)
                     \         |             |             /
                      +--------+-- periph_bus (round robin) --+
                      |        |        |        |        |        |
                   bootrom   sram     gpio     dma     sdio_regif  sdio_regif
                  0x1A00_0000 0x1C00_0000 0x1A10_1000 0x1A10_2000 regs 0x1A10_3000  memory window 0x2000_0000
                                                   |            |
                                              spi_master    sd_cmd_engine + sd_dat_engine
                                                                 |
   jtag_dtm --DMI--> debug_module --> halt/resume/dpc to the CPU
```

`sysctrl_top` instantiates everything. It exposes the CPU's two bus ports, so the
core plugs in from outside. The testbench uses a behavioural CPU for this. The top
also exposes the debug-control wires (`debug_req_o`, `resume_req_o`, `dpc_we_o`/`dpc_o`,
`cpu_halted_i`, `ndmreset_o`), the boot-address output and all pins.
`boot_addr_o` is `0x2000_0000` (the card window) when the boot-select pin
`boot_sel_i` is high. Otherwise it is the bootROM base `0x1A00_0000`.

### Bus protocol

All blocks share one simple bus (`sysctrl_pkg`):

- Request `{req, we, addr[31:0], wdata[31:0], be[3:0]}`.
- Response `{ready, err, rdata[31:0]}`.

The master holds `req` and the other fields steady until a cycle with `ready`. That
cycle ends the transfer, and `rdata` and `err` are valid in it.

A slave may stall for as long as it needs. The SD memory window stalls for a whole
card transfer. `periph_bus` arbitrates round-robin and keeps a grant until `ready`.
An address that decodes to no slave is answered at once with `err`. There are four
masters: debug module, CPU data, CPU instruction and DMA. Round-robin matters
because the CPU polls the DMA while the DMA itself needs the bus.

### Memory map

| Base | Size | Slave |
|---|---|---|
| `0x1A00_0000` | 4 KiB window (768 words filled) | bootROM, read only. Writes return `err` |
| `0x1A10_1000` | 4 KiB | GPIO |
| `0x1A10_2000` | 4 KiB | DMA + SPI |
| `0x1A10_3000` | 4 KiB | SDIO register interface |
| `0x1C00_0000` | 64 KiB | SRAM |
| `0x2000_0000` | 256 MiB | SD card memory window (external boot) |

## The SDIO register interface (`sdio_regif`)

This block is the most involved part and carries two of the four boot modes. It
contains three pieces:

- `sd_cmd_engine` sends one 48-bit command and receives its response.
- `sd_dat_engine` moves one 512-byte data block, or waits out card busy.
- A 128-word block buffer.

A controller state machine then drives these engines for three kinds of client:
the reset-time initialisation, software through registers, and the memory window.

### Line timing

The SD clock is a divided system clock: one half period is `CLKDIV + 1` system
clocks. A clock generator produces one-cycle `fall` and `rise` strobes. The host
drives CMD and DAT after a falling edge and samples them on a rising edge.

The command engine works as follows:

- It shifts out start bit, direction bit, index, argument, CRC7 and end bit.
- It then waits up to `NCR_MAX` SD clocks for the response start bit. If none comes, it flags a timeout.
- It receives 48 or 136 bits and checks the CRC7 unless the response type says not to. R3 carries no valid CRC.
- In a 48-bit response, bits [31:0] are the card's payload and [37:32] its index.
- R2 (136 bits) is returned as bits [127:0] without the start bits.

The data engine does three things:

- **Read.** It receives a block on DAT0, or on DAT[3:0] in 4-bit mode, and checks a CRC16 per line.
- **Write.** It sends start bit, data, per-line CRC16 and end bit. It then reads the card's 3-bit CRC status token and waits while the card holds DAT0 low.
- **Busy.** It waits on DAT0 only, for R1b commands such as CMD7. The first two samples are ignored, because the card may only start driving busy a couple of clocks after the response.

Every wait has a timeout (`DAT_TIMEOUT` SD clocks).

### Reset-time initialisation

After reset the FSM brings the card up with no software involved:

1. 80 idle clocks with CMD high.
2. CMD0.
3. CMD8 with `0x1AA`.
4. CMD55 + ACMD41 repeated until the card reports power-up complete, at most `ACMD41_TRIES` times. The CCS bit in that answer says whether the card uses block or byte addressing.
5. CMD2.
6. CMD3, whose answer supplies the relative card address (RCA).
7. CMD7 to select the card, with a busy wait.
8. CMD55 + ACMD6 to switch to the 4-bit bus.
9. CMD16 for 512-byte blocks.

During this sequence the clock runs at `INIT_CLKDIV` (62, about 400 kHz from
50 MHz). At the end the FSM switches to `FAST_CLKDIV` and sets *card ready*.
If any step times out or ACMD41 never completes, *init failed* is set instead.
The boot code checks these STATUS bits first: if the card is ready it reads
straight away, otherwise it repeats the sequence itself through the registers.

### Register port

| Offset | Name | Meaning |
|---|---|---|
| 0x00 | CMD | write: [5:0] index, [9:8] response type (0 none, 1 R1/R6/R7, 2 R3 without CRC, 3 R2), [10] read a block, [11] write a block, [12] busy wait |
| 0x04 | ARG | command argument |
| 0x08–0x14 | RESP0–3 | response bits |
| 0x18 | STATUS | [0] busy, [1] cmd timeout, [2] cmd CRC error, [3] data timeout, [4] data error, [8] card ready, [9] init failed |
| 0x1C | CLKDIV | SD half period − 1 |
| 0x20 | CFG | [0] 4-bit bus, [1] card ready, [2] block addressing |
| 0x24 | RCA | relative card address |
| 0x200–0x3FC | buffer | the 512-byte block buffer |

Software writes ARG, then CMD, and polls STATUS[0].

### Memory window (external boot)

A bus access at window offset `A` concerns card block `A/512`. The window keeps
that one block in the buffer and remembers which block it is:

- **Read, block buffered:** answered from the buffer, with no card traffic.
- **Read, other block:** the window issues CMD17 and answers when the block has arrived. The CMD17 argument is the block number when the card uses block addressing, otherwise the byte address.
- **Write:** the window first makes sure the block is buffered, merges the bytes selected by `be`, writes the whole block back with CMD24, waits out busy, and only then answers. There is no write-back cache, so the card always matches what the bus has seen.

While the initialisation FSM is still running, window accesses simply wait. A CPU
that resets into the window therefore stalls until the card is ready. When the FSM
has finished without success, window accesses return `err`.

Each instruction fetch that leaves the buffered block costs a full block read. Code
runs from the card, but slowly. That is inherent in the mode.

## SPI path (`dma`, `spi_master`)

The SPI mode exists as a fallback that avoids the SD host block completely. The
SPI master is mode 0, MSB first, and one byte takes `16·(SPI_DIV+1)` system clocks.
It is reachable only through the DMA, whose registers sit at `0x1A10_2000`:

| Offset | Name | Meaning |
|---|---|---|
| 0x00 | TX_ADDR | byte address of data to send |
| 0x04 | RX_ADDR | byte address for received data |
| 0x08 | LEN | bytes |
| 0x0C | CTRL | write: [0] start, [1] transmit from memory, [2] store received bytes; read: [0] busy |
| 0x10 | SPI_DIV | clock divider, reset 63 |
| 0x14 | SPI_CSN | chip select level, reset 1 |

Each byte is handled in turn:

1. Read the byte from TX_ADDR, or use 0xFF when transmit is disabled.
2. Shift it out.
3. Write the byte received in exchange to RX_ADDR, on the right byte lane.

The ROM code builds each SD SPI-mode command (CMD0, CMD8, ACMD41, CMD58, CMD16,
CMD17) as a 6-byte buffer in SRAM. It then uses single-byte DMA runs to poll for
the response, the start token and the block.

## Debug path (`jtag_dtm`, `debug_module`)

`jtag_dtm` is a standard 1149.1 TAP with a 5-bit IR. It provides the RISC-V
debug-transport registers:

| IR code | Register |
|---|---|
| 0x01 | IDCODE (selected at reset) |
| 0x10 | DTMCS: version 1, abits 7, dmistat, dmireset, dmihardreset |
| 0x11 | DMI: 41 bits, `{addr[6:0], data[31:0], op[1:0]}` |
| other | BYPASS |

An Update-DR with op 1 or 2 starts a debug-module access. The next Capture-DR
returns the data with op 0. If the access has not finished by then, it returns
op 3, which stays set until dmireset.

The request crosses from `tck` into `clk` as a toggle through a two-flop
synchroniser, and the response comes back the same way. `tck` must therefore be
several times slower than `clk`. TDO changes on the falling edge of `tck`.

`debug_module` implements the part of the RISC-V debug specification (0.13) that
loading and starting a program needs:

- **dmcontrol:** haltreq, resumereq, ndmreset, dmactive.
- **dmstatus:** all/any halted, running, resumeack. Version is 2.
- **abstractcs, command, data0:** the only supported command is an access-register write of `dpc` (`0x002307B1`). Any other command gives cmderr 2, and a command while the CPU is running gives cmderr 4.
- **sbcs, sbaddress0, sbdata0:** 32-bit system-bus access with autoincrement, readonaddr and readondata. A bus error is reported as sberror 2.

There is no program buffer and no general register access. The debugger halts the
core, writes the image into SRAM through the system bus, writes `dpc` and resumes.

## GPIO and boot selection (`gpio`)

| Offset | Name | Meaning |
|---|---|---|
| 0x00 | GPIO_ENABLE | per-pin input enable, reset 0 |
| 0x04 | PADIN | synchronised pad levels AND enable |

The ROM code enables pins 9 and 12 and reads them:

- pin 9 high: skip all loading and go to the endless loop, which leaves the CPU to the debugger;
- pin 12 (the SPI chip select line used as a strap) high: SPI mode;
- otherwise: SDIO first, then SPI if SDIO fails, then the loop.

## Memories (`bootrom`, `sram`)

Both are one-cycle synchronous arrays. `sram` takes byte enables. `bootrom` has 768 words
(3 KiB, the size of the boot program) and loads a hex file given by the `INIT_FILE`
parameter. Writes to it are answered with `err`. `sram` is 64 KiB.

## Packages

- `sysctrl_pkg`: bus types, idle values, the memory map, byte-enable merge.
- `sd_pkg`: CRC7 and CRC16 (CCITT, x^16+x^12+x^5+1) update functions, response and data-operation encodings.

## Testbenches

Every block has a self-checking testbench, `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Two card models
are testbench-only:

- `sd_card_model` speaks SD bus mode: identification, select, 1/4-bit, CMD17/24 with CRCs, busy.
- `sd_spi_card_model` speaks SPI mode.

`tb_sysctrl_top` is the end-to-end test at default sizes. Its behavioural CPU runs
the ROM boot flow over the real bus. The test covers six scenarios:

1. SDIO boot with the card initialised by hardware.
2. SDIO boot after a software re-initialisation.
3. SPI boot selected by pin 12.
4. SPI boot as a fallback when the SD-mode card is absent.
5. JTAG boot with pin 9 holding the CPU in the loop while the debugger loads SRAM, sets `dpc` and resumes.
6. External boot with the CPU fetching from the card window.

Each scenario checks that the image landed and ran, and the test counts how often
each mechanism was used. `+first=N` starts at scenario N.

Simulate with plain Verilator, for example:

```
verilator --binary --timing -y rtl -y tb rtl/sysctrl_pkg.sv rtl/sd_pkg.sv \
          tb/tb_sysctrl_top.sv --top-module tb_sysctrl_top
./obj_dir/Vtb_sysctrl_top
```

The full-size top test runs about ten seconds of wall time. The SD-clock divider
of 62 makes initialisation long in simulated cycles. `tb_sdio_regif` overrides the
dividers and retry counts to stay short.

## What is this design's own

The source describes these parts by role:

- the four boot modes and which hardware each one uses;
- the bootROM at `0x1A00_0000` and its size of about 3 KiB;
- the SDIO register interface with a hardware FSM that initialises the card and turns bus accesses into card reads and writes;
- the DMA in front of the SPI interface;
- the JTAG transport to a RISC-V debug module with halt, resume and SRAM access;
- the GPIO9/CSN1 control flow and the final endless loop.

The following are choices made here:

- the bus protocol and round-robin arbitration;
- all other addresses and every register map;
- the SD command sequence details, taken from the SD physical-layer specification;
- the single-block buffer and write-through window;
- the clock dividers, timeouts and IDCODE;
- the subset of the debug specification;
- separate SD and SPI pins, so each path can have its own card holding the same data. Pad multiplexing, Schmitt-trigger pads and pad configuration are not modelled.

The CPU core, the boot software itself and the rest of the chip around this
subsystem are not part of this RTL.
