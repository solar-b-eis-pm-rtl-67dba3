# SC_PROC: control logic of an instrument processor board

The SC_PROC board is the processor card of the instrument control unit (ICU)
of the EIS spectrometer on the Solar-B spacecraft. A 21020 DSP at 20 MHz runs
the instrument software. All the rest of the board's logic sits in one FPGA
called TWIB_CTL (Time, Watchdog, Interfaces and Boot control). It does five
jobs:

* It talks to the spacecraft's **mission data processor (MDP)** over three
  clocked serial links, each buffered by off-the-shelf 4k x 9 FIFOs:
  * commands come in;
  * status packets go out;
  * mission (science) data packets go out.
* It keeps **spacecraft time**, a 32-bit count of 1.9 ms ticks.
* It runs a **watchdog**. When the watchdog trips, it reboots the board but
  keeps a record of why.
* It **boots** the DSP. The DSP is held in reset while a small loader is
  copied from a byte-wide PROM into the 48-bit program RAM.
* It decodes the DSP's I/O space and routes the four interrupts.

This repository is a SystemVerilog version of that logic. It also contains
the six FIFOs, written as synchronous memories, and the board-level bus
multiplexing. Each block has a self-checking testbench. An end-to-end test
runs at reduced sizes, and another runs with every parameter at its default.

```
                 +-------------------------- sc_proc_top --------------------------+
   DSP program   |  +------------------------ twib_ctl -------------------------+  |
   bus (PMS1,    |  | io_decode -> port strobes, card selects, ~OD0/~OD1       |  |
   PMA, PMD, --->|  | sctime (32-bit) <- tick_gen (1.9 ms)                      |  |
   rd/wr)        |  | watchdog -> trip -> reset_ctl -> global reset            |  |
                 |  | boot_ctl (PROM -> program RAM, holds DSP reset)          |--+--> mem_* bus, prom_cs_n
   MDP links <-->|  | cmd_if  <-- CMD_ENA/CLK/DATA    ~IRQ3                    |  |
                 |  | st_if   --> ST_ENA/CLK/DATA                              |  |
                 |  | md_if   --> MD_ENA/CLK/DATA, <-- BUSY   ~IRQ0            |  |
                 |  +-------------+-------------+--------------+---------------+  |
                 |     CMD FIFO 3 x 4k x 9   ST FIFO 4k x 9   MD FIFO 2 x 4k x 9   |
                 +-----------------------------------------------------------------+
```

## The I/O map

The board's own ports sit in DSP program-memory bank 1 (`~PMS1`). Address
bits PMA[23:21] choose the target:

| PMA[23:21] | Address     | Target                                        |
|------------|-------------|-----------------------------------------------|
| 100        | 0x80 000x   | camera / MHC control card (`cm_sel_n`)         |
| 101        | 0xA0 000x   | PSU monitor card (`mon_sel_n`)                 |
| 110        | 0xC0 000x   | SC_PROC ports below, chosen by PMA[3:0]        |
| 111        | 0xE0 0000   | boot PROM, 32k x 8 (`prom_cs_n`)               |

PMA[20:4] are ignored. Each status or control register is one byte on
PMD[47:40]. Names that start with `~` are active low. Writing 0 to a `~` bit
that names an action (clear, reset, go) performs it; writing 1 does nothing.
The exceptions are `~WD_EN`, `~WDTToSel` and `~EOP`: these are plain storage
bits and take whatever value is written.

| Port | Read                                                      | Write                                         |
|------|-----------------------------------------------------------|-----------------------------------------------|
| 0    | time, PMD[47:16]                                          | load time, PMD[47:16]                         |
| 1    | `~WDTrip ~WD_EN ~WDTToSel 0 ~DC_RST 0 0 0`                | `~WDTripRst ~WD_EN ~WDTToSel ~WD_RST x x x x` |
| 2    | `0 ~BitErr ~HF ~Irq ~OvrFlw ~EF ~FF CMD_ENA`              | `x ~ClrBitErr x ~ClrIrq ~ClrOvrFlw ~RST x x`  |
| 3    | command FIFO word, PMD[47:21] (removes it)                | –                                             |
| 4    | `~ST_GO 0 0 0 0 ~EF ~FF ST_ENA`                           | `~ST_GO x x x x ~RST x x`                     |
| 5    | –                                                         | status byte, PMD[23:16]                       |
| 6    | `0 ~FF ~EF BSY ~IRQ ~EOP ~GO 0`                           | `~RST x x x ~ClrIrq ~EOP ~GO x`               |
| 7    | –                                                         | mission data word, PMD[31:16]                 |
| 8, 9 | –                                                         | pulse `~OD0` / `~OD1` (test port)             |

All other reads return 0. `scproc_pkg` holds the bit numbers and the port
enumeration.

Interrupts, from highest to lowest priority:

| Line    | Source                                            |
|---------|---------------------------------------------------|
| `~IRQ3` | command packet received                           |
| `~IRQ2` | MHC UART (input `mhc_irq_n`, passed through)      |
| `~IRQ1` | ROE UART (input `roe_irq_n`, passed through)      |
| `~IRQ0` | mission data packet sent                          |

## The three MDP links

All three links use the same signals: an enable that frames a packet, a bit
clock and a data line.

### Commands in (`cmd_if`)

The MDP raises `CMD_ENA` and clocks bits in on rising edges of `CMD_CLK`,
MSB first. All three inputs are synchronised to the 20 MHz board clock and
the clock edges are detected there. Each `CMD_CLK` level must therefore last
at least three board clocks.

The command FIFO is three 9-bit FIFOs side by side, forming one 27-bit word.
Received bytes are gathered three to a word. Each 9-bit segment holds a byte
plus an end-of-packet (EOP) flag, and software uses that flag to find the
packet length quickly. The first byte of a word lands on PMD[47:39], the
second on PMD[38:30] and the third on PMD[29:21].

The receiver cannot know that a byte is the last one until `CMD_ENA` falls.
So it always holds the newest byte back:
* If another byte completes, the held byte goes into the word without EOP.
* If `CMD_ENA` falls, the held byte goes in with EOP set, and the word is
  written even if only partly filled. Unused segments are zero.

When `CMD_ENA` falls:
* `~Irq` (`~IRQ3`) goes low.
* If the bit count is not a whole number of bytes, `~BitErr` goes low and
  the stray bits are dropped.

If the FIFO is full when a word is ready, that word is lost and `~OvrFlw`
goes low. Reading port 3 returns the head word and removes it.

### Status out (`st_if`)

Software writes the packet byte by byte into the status FIFO (port 5), then
writes `~ST_GO`=0. The state machine then does the following:
* It raises `ST_ENA`.
* It sends each byte MSB first until the FIFO is empty.
* After the last bit it drops `ST_ENA` and returns `~ST_GO` to 1 by itself.

There is no interrupt: a status packet only ever answers a command, so the
software already knows when to expect it.

### Mission data out (`md_if`)

This link is the hardest to understand, because a packet can be longer than
its 4k x 16 FIFO. Software therefore sends it as sub-packets. The `~EOP`
control bit tells the hardware whether more sub-packets follow. It is an
ordinary register bit and is rewritten by every control write, so software
must write it with the intended value every time.

```
software:  fill FIFO, write ~GO=0 ~EOP=1   wait ~GO=1, fill, ~GO=0 ~EOP=1   ...   fill, ~GO=0 ~EOP=0
MD_ENA  :  ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______
MD_CLK  :  ‾‾‾‾‾\_/\_/ ... \_/‾‾‾‾ hold ‾‾‾‾‾\_/\_/ ... \_/‾‾‾‾‾  ...  \_/\_/ ... \_/‾‾‾‾‾‾‾‾‾‾‾‾‾
~IRQ0   :  ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____ until ~ClrIrq
```

* **Start.** The first sub-packet waits until the MDP's `BUSY` input is low.
  Later sub-packets do not wait for it.
* **End of each sub-packet.** When the FIFO runs empty and the last bit has
  gone, `~GO` returns to 1. Software polls for this before loading the next
  sub-packet.
* **Between sub-packets.** If `~EOP` is 1, `MD_ENA` stays high and the link
  idles until the next `~GO`.
* **End of the packet.** If `~EOP` is 0, `MD_ENA` falls. That falling edge
  sets `~IRQ` (`~IRQ0`), which stays low until software writes `~ClrIrq`.

Words are 16 bits, MSB first. The low byte is stored in one FIFO and the
high byte in the other.

### Bit format (status and mission data)

Both outgoing links use the same transmitter (`ser_tx`). Each bit lasts
`2*BIT_HALF` board clocks: the clock is low for the first half with the data
already valid, then high for the second half. The receiver samples on the
rising edge. The clock idles high. Consecutive words are separated by a
two-clock gap. At the default `BIT_HALF` of 10 the link runs at 1 Mbit/s.

## Watchdog, reset and warm reboot

Two resets exist:
* **Power-on reset** (`por_n`, also the test push-button) clears everything.
* **Global reset** (`sys_rst`) clears everything except the watchdog
  status/control register and the 1.9 ms time base. It is the power-on reset
  OR a watchdog trip, stretched by `RST_STRETCH` clocks. It also appears on
  the test port as `~WRM_RST`.

Because the watchdog register survives the global reset, software that
starts after a warm reboot can read what caused it.

Three things trip the watchdog:

| Cause                                                                 | Flag set  |
|-----------------------------------------------------------------------|-----------|
| the counter reaches its terminal count                                | `~WDTrip` |
| `~V_FAIL` from the monitor card goes low                              | `~WDTrip` |
| a direct reset command is decoded elsewhere (input `dc_rst_req`)      | `~DC_RST` |

The counter works as follows:
* It counts 1.9 ms ticks.
* After power-on it is disabled and held at zero.
* With `~WDTToSel`=1 it trips at 4096 ticks (7.78 s). With `~WDTToSel`=0 it
  trips at 8192 ticks (15.56 s).
* Software keeps it from tripping by writing `~WD_RST`=0, which clears the
  counter and nothing else.
* `~WDTripRst`=0 clears both flags.

A trip resets the whole board, including the interfaces, their FIFOs and
spacecraft time, and starts the boot copy again.

## Boot copy

While the global reset is active and until the copy ends, `boot_ctl` holds
`dsp_rst_n` low. The copy works like this:
* PROM byte addresses count up from 0. Each address is held for `PROM_ACC`
  clocks, which is 300 ns at the default of 6 and suits a 250 ns EEPROM.
* Six bytes, most significant first, make one 48-bit instruction.
* Instruction *n* comes from PROM bytes 6n to 6n+5 and is written to program
  RAM word *n*.

After `BOOT_WORDS` instructions the DSP is released and starts running the
copied loader from address 0. The copy takes
`BOOT_WORDS x (6 x PROM_ACC + 1)` clocks, which is 9472 clocks (0.47 ms) at
the defaults. During the copy, `sc_proc_top` drives the board program bus
(`mem_*`, `prom_cs_n`) from the boot controller. Afterwards the bus follows
the DSP.

## Bus timing used here

The real DSP bus is asynchronous, and its wait states (three for the I/O
ports) are set inside the DSP. In this design the DSP's accesses reach the
logic as follows:
* `pm_rd` and `pm_wr` are one-clock strobes in the 20 MHz domain, qualified
  by `pms1_n` and the address.
* `pm_rdata` is combinational during the `pm_rd` clock.
* A read of the command FIFO removes the word at the end of that clock.

An adapter from real `~PMRD`/`~PMWR` timing would sample those strobes and
produce these pulses.

## Parameters

| Parameter     | Default | Meaning                                                     |
|---------------|---------|-------------------------------------------------------------|
| `TICK_DIV`    | 38000   | clocks per 1.9 ms tick at 20 MHz                            |
| `WD_TC_SHORT` | 4096    | ticks to trip with `~WDTToSel`=1 (7.78 s)                    |
| `WD_TC_LONG`  | 8192    | ticks to trip with `~WDTToSel`=0 (15.56 s)                   |
| `RST_STRETCH` | 16      | clocks the global reset outlasts a trip                     |
| `ST_BIT_HALF` | 10      | clocks per half bit on the status link                      |
| `MD_BIT_HALF` | 10      | clocks per half bit on the mission data link                |
| `BOOT_WORDS`  | 256     | instructions copied at boot (at most 5461)                  |
| `PROM_ACC`    | 6       | clocks per PROM byte read                                   |
| `FIFO_DEPTH`  | 4096    | depth of each of the six FIFOs                              |

## What follows the original design and what is this design's choice

These points follow the original design:
* the register layouts and flag meanings;
* the I/O addresses and interrupt routing;
* the FIFO organisation (three parts side by side for commands, one for
  status, two in width expansion for mission data);
* the sub-packet scheme;
* the time-outs, the 1.9 ms time base and the 32-bit time;
* the boot scheme.

The following are choices made here, because the serial timing and several
details were defined in interface documents that were not available:
* **Serial links.** Bit order (MSB first), clock polarity, sampling edge and
  bit rate.
* **Command word packing.** Three bytes per 27-bit word, first byte on top.
  An overflow loses the whole three-byte word.
* **Watchdog timing.** The time-outs are counted in 1.9 ms ticks:
  4096 x 1.9 ms = 7.78 s.
* **`~V_FAIL`.** It sets `~WDTrip`. The register has no separate voltage-fail
  flag; bit PMD42 reads 0.
* **`BUSY`.** It is checked only before the first sub-packet.
* **Boot.** The loader length (256 instructions), the byte order (most
  significant first) and the PROM access time. Each instruction takes six
  PROM bytes, so instruction 1 starts at byte 6.
* **Map conflicts.** The I/O base is taken as PMA[23:21] = 110, with the PROM
  at 111. The PROM is taken as 32k x 8.
* **Mission data interrupt.** It is raised at the end of the whole packet
  (the falling edge of `MD_ENA`), not after every sub-packet.
* **Status `~ST_GO`.** It returns to 1 once the FIFO is empty *and* the last
  bit has been sent.
* **FIFOs.** They are synchronous to the board clock. `~HF` means more than
  half full.
* **Synchronous I/O.** All I/O is in one 20 MHz clock domain, and the MDP
  inputs pass through two-flop synchronisers.

The direct reset command's decoder is outside this logic and enters as
`dc_rst_req`.

## Not included

These parts are outside the RTL:
* the DSP and its JTAG port;
* the program, data and working SRAMs and the PROM (the testbenches model
  the program RAM and PROM);
* the differential line drivers and receivers and their filter cores;
* bus buffers and glue gates;
* the oscillator;
* the external test board on the OD port.

Their signals are ports of `sc_proc_top`. The data RAM (bank `~DMS0`) and
working RAM (`~DMS2`) connect only to the DSP, so no signal of theirs passes
through this logic.

## Files

The RTL in `rtl/`:

| File                 | Contents                                                      |
|----------------------|---------------------------------------------------------------|
| `scproc_pkg.sv`      | address constants, port enumeration, register bit numbers, FIFO word types |
| `sc_proc_top.sv`     | the board: `twib_ctl`, six FIFOs, boot bus multiplexer        |
| `twib_ctl.sv`        | the control FPGA: read multiplexer, interrupts, test-port strobes |
| `io_decode.sv`       | bank-1 address decoder                                        |
| `tick_gen.sv`        | 1.9 ms tick generator                                         |
| `sctime.sv`          | spacecraft time counter                                       |
| `watchdog.sv`        | watchdog counter and register                                 |
| `reset_ctl.sv`       | reset circuit                                                 |
| `cmd_if.sv`          | command link                                                  |
| `st_if.sv`           | status link                                                   |
| `md_if.sv`           | mission data link                                             |
| `ser_tx.sv`          | serial transmitter shared by the two outgoing links           |
| `boot_ctl.sv`        | boot copy                                                     |
| `fifo_idt7204.sv`    | 4k x 9 FIFO                                                   |

In `tb/`, each block `X` has a self-checking testbench `tb_X.sv`. There is
also:
* `tb_ser_rx.sv`, a receiver model of the MDP side of a link;
* `tb_sc_proc_top.sv`, the end-to-end test at reduced sizes;
* `tb_sc_proc_full.sv`, the end-to-end test with every default.

Every testbench prints `TB_RESULT checks=N failures=M` and exits.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sc_proc_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/scproc_pkg.sv tb/tb_sc_proc_top.sv -o sim
./obj_dir/sim
```

Substitute any other testbench name for `tb_sc_proc_top`. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/scproc_pkg.sv rtl/sc_proc_top.sv`.

`tb_sc_proc_top` runs in well under a second. Each of these mechanisms must
happen at least once, and the test reports a count for each:
* boot copy and warm reboot;
* time load and time advance;
* command interrupt, bit error, half-full, overflow and command FIFO reset;
* status packet;
* `BUSY` wait, sub-packet hold and mission data interrupt;
* UART interrupt pass-through;
* test-port strobes and card selects;
* watchdog trip, `~V_FAIL`, direct reset and power-on reset.

`tb_sc_proc_full` does the same with every default. It includes a full
4096-word sub-packet, a full command FIFO and a watchdog that runs out after
one kick. That is about 16 s of board time, some 320 million clocks, and
takes about 3.5 minutes.

## How far to trust it

* **Verification.** Each block's testbench compares its outputs with values
  computed independently. Each testbench was also run against a copy of its
  module with one deliberate bug (for example a swapped time-out select, a
  missing EOP flag, or five PROM bytes per instruction), and it failed every
  time.
* **Synthesis.** The RTL synthesises. Lint reports only unused-signal and
  unused-constant warnings, for example for the ignored PMA[20:4], the unused
  FIFO half-full flags and package constants that not every module uses.
* **The main uncertainty.** Link timing and bit order are this design's
  choice. Before connecting the logic to a real MDP, check them against the
  interface control document for that link.
