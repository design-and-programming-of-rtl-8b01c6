# HERMESS Signal Processing Unit — FPGA fabric

HERMESS measures the loads and temperatures on the hull of a sounding rocket.
Six measurement points (STAMPs, *Strain and Temperature Applied Measurement
Points*) each carry two strain gauge rosettes (SGR) and one PT-100 resistance
thermometer (RTD). Every sensor has its own 16-bit delta-sigma ADC of the
ADS1148 family, so one Signal Processing Unit serves 18 converters. The
twelve SGR converters run at 1 or 2 kHz and must stay in step, so that one
row of samples describes one instant of the flight.

A microcontroller alone cannot serve twelve interrupts every 500 µs. This
RTL moves the whole acquisition into the FPGA fabric of a SmartFusion2 SoC.
The Cortex-M3 of the SoC (the MSS) then only does two jobs. It sets up the
converters at start-up. After that it gets **one interrupt per sample row**
and copies a ready-made 60-byte record to flash.

The fabric (`hermess_fabric`) holds:

| unit | count | job |
|---|---|---|
| `stamp` | 6 | one per measurement point: SPI link to its three ADCs, automatic readout into a 64-bit data frame, skew watch between its two SGR ADCs |
| `memsync` | 1 | joins the six frames into one data package with a timestamp; resynchronises the ADCs when they drift; requests a system reset when too many STAMPs are dead |
| `spi_master` | 6 | one inside each `stamp` |
| `apb3_bus` | 1 | decodes the MSS APB3 port into seven 4 KiB slots |

Everything runs in one 50 MHz clock domain: the APB clock of the MSS.

## Signals at the fabric boundary

* APB3 slave port (`psel`, `penable`, `pwrite`, `paddr[31:0]`, `pwdata`,
  `prdata`, `pready`, `pslverr`). The MSS reaches it in two equal address
  windows:

  | slot | 0x5000_0000 window | 0x3000_0000 window | unit | interrupt |
  |---|---|---|---|---|
  | 0 | 0x5000_0000 | 0x3000_0000 | MemSync | `f2m_irq[0]` |
  | n = 1..6 | 0x5000_n000 | 0x3000_n000 | STAMP n | `f2m_irq[n]` |

  An access to any other slot ends at once with `pslverr`.
* Per STAMP link n: `spi_sclk[n]`, `spi_mosi[n]`, `spi_miso[n]`,
  `adc_cs_n[n][2:0]` and `adc_drdy_n[n][2:0]`. Index 0 is SGR1, 1 is SGR2
  and 2 is RTD.
* `cstart_n` goes to the START pin of all 18 converters. A low pulse aborts
  the running conversions, and all converters restart together when it rises.
* `hard_reset_n` is a low pulse meant for the SoC reset input.

## STAMP unit

### Talking to the converters

Each STAMP unit is an APB3 slave. It decodes a 12-bit address (bits 3..0 are
ignored):

| address bits | meaning |
|---|---|
| 11 | **atomic**: no automatic readout may start until the *next* command to this STAMP has finished |
| 10 | **status reset**: clear the N/O/RR flags when this command finishes |
| 9..8 = 00 | **ADC access**. Bits 6, 5 and 4 select SGR1, SGR2 and RTD (any mix). A write sends PWDATA as one 32-bit SPI transfer to all selected ADCs. A read sends 0xFFFF_FFFF (NOP) and returns what MISO carried. Bit 7 set together with an ADC bit is **polling**: PREADY is held until the selected ADCs show data ready again, e.g. after a calibration. Bit 7 alone returns the last MISO word. |
| 9..8 = 01 | **frame readout**: bit 7 = 0 gives `{SGR1, SGR2}`, bit 7 = 1 gives `{RTD, status}` |
| 9..8 = 10 | **configuration register** |
| 9..8 = 11 | 32-bit scratch register |

Configuration register:

| bits | field |
|---|---|
| 31 | R: reset the whole unit (clears itself) |
| 30 | C: continuous mode |
| 29..24 | async threshold, in µs |
| 23..3 | reserved (stored) |
| 2..0 | ID, read-only, 1..6 |

### Continuous mode and the data frame

With C set, a falling edge on a converter's data-ready line queues a readout
of that converter. The unit then clocks out 16 bits of NOP and stores the
result in the frame. If several readouts are pending, SGR1 goes first, then
SGR2, then RTD. The 64-bit frame is

    63..48 SGR1 | 47..32 SGR2 | 31..16 RTD | 15..0 status
    status: 15..13 N1..N3 | 12..10 O1..O3 | 9 RR | 8..3 async cycles (signed) | 2..0 ID

* Nk is set once ADC k has been read since the last status reset.
* Ok is set once it has been read twice, so a value was overwritten unseen.

`data_avail` (the STAMP interrupt, and the MemSync input) rises once both SGR
converters of a round have been read. It falls when the next automatic readout
starts.

### Skew watch

The two SGR converters of one STAMP should signal data ready in the same
clock cycle. The unit counts the cycles between the two falling edges and
divides them by `ASYNC_PRESCALE` (default 50, so the unit is 1 µs). It stores
the result as a signed 6-bit value. The value is positive when SGR1 came
first, and it saturates at ±31. When the magnitude exceeds the async
threshold, the unit sets RR and its `sync_req` output. A later round inside
the threshold, or a status reset, clears them. The RTD converter takes no
part in this.

### Timing

* A register access takes 2 APB cycles after the setup phase.
* An ADC access first waits for any automatic readout in progress. The SPI
  transfer then takes `CS_SETUP + 64*SPI_HALF + CS_HOLD + CS_GAP` cycles.
* At the defaults the SPI clock is 1.5625 MHz, and one automatic 16-bit
  readout takes 609 cycles (12.2 µs).

## MemSync unit: the data package

### Assembling a package

MemSync waits while idle. The first `data_avail` rising edge from any STAMP
starts a package. MemSync then copies that STAMP's frame and stamps the
package with the current time, in 100 µs ticks since reset. Each further
STAMP that delivers gets its frame copied and its arrival time stored as a
one-byte offset from the timestamp. When every STAMP that is not marked failed
has delivered, MemSync **latches** the package and raises `f2m_irq[0]`.

| byte | content |
|---|---|
| 0 | 0x00: start marker (erased flash reads 0xFF) |
| 1..4 | timestamp, 100 µs ticks, MSB first (wraps after about 5 days) |
| 5..10 | offset of STAMP 1..6 in ticks; 0xFE means saturated, 0xFF means not delivered |
| 11 | FS: bit 7 resync triggered, bit 6 a package was missed, bits 5..0 failed STAMP 6..1 |
| 12..59 | frames of STAMP 1..6, MSB first |

A STAMP that did not deliver keeps the last frame copied from it.

### Reading it out

MemSync decodes these APB addresses:

| address | access |
|---|---|
| `0x000 + 16*k`, k = 0..14 | word k of the package: bytes 4k..4k+3, with byte 4k in bits 7..0 |
| `0x800 \| …` | the same access, and afterwards the package is freed |
| `0x100` | configuration: bit 0 component reset (clears itself), bit 1 resync enable, bit 2 hard reset enable |

So reading words 0..13 and then word 14 at `0x8E0` copies a complete package,
and writing the words little-endian reproduces the byte layout above.

While a package is latched, new STAMP data is not taken. MemSync only sets
the *missed* bit in FS. While a package is being **assembled**, every APB
access to MemSync is held with PREADY low until it is latched. An access in
that window would otherwise disturb the MSS's sense of the arrival times.

### The control state machine

MemSync has four states:

* **IDLE**: waits for the first `data_avail`.
* **READING**: collects frames; APB accesses are held.
* **LATCHED**: the package is ready; APB accesses proceed.
* **APB**: one access is being served.

| state | condition, in priority order | next state and action |
|---|---|---|
| IDLE | data available from any STAMP | READING: take timestamp, copy frames |
| IDLE | APB access | APB |
| IDLE | resync condition (below) | IDLE: pulse `cstart_n` |
| READING | data available | READING: copy frame, store offset |
| READING | every STAMP not marked failed has delivered | LATCHED: raise the interrupt |
| READING | 5 ms in READING | LATCHED: raise the interrupt, mark missing STAMPs failed, hard reset if four or more are bad |
| LATCHED | APB access | APB; new data available only sets *missed* |
| APB | access done, came from IDLE or package freed | IDLE: drop the interrupt |
| APB | access done otherwise | LATCHED |

### Resynchronisation

The converters run from their own clocks, and they drift apart. MemSync has
two detectors for this:

1. **STAMP level**: any STAMP asserts `sync_req`, because its two SGR
   converters are further apart than its threshold.
2. **System level**: the last package took **300 µs or more** to assemble,
   so the STAMPs are out of step with each other.

A resync happens only when both of these hold:

* resync is enabled in the configuration;
* at least **1 s** has passed since the previous resync, which prevents
  endless resync loops.

For a resync, MemSync pulls `cstart_n` low for 2 µs while idle. The next
package then carries the FS resync bit. A resync costs at most one
conversion period.

### Failed STAMPs and the hard reset

* If a package is still incomplete **5 ms** after it started, every STAMP that
  has not delivered is marked failed. Such a STAMP stays failed until a
  MemSync reset, and later packages no longer wait for it.
* If at that moment **four or more** STAMPs are missing or failed, and hard
  reset is enabled, MemSync pulses `hard_reset_n` low for 2 µs. The intent is
  a full system restart, which brings dead converters back.

## Start-up sequence expected from the software

1. Write the ADC registers through the STAMP pass-through commands. A
   command can go to several converters at once. Use polling for
   calibrations.
2. Set C and the async threshold in each STAMP configuration register.
3. Set resync enable and hard reset enable in MemSync.
4. On each `f2m_irq[0]`, read the 15 package words, freeing the package on
   the last one, and store them.

## Parameters

Top-level parameters and their defaults (50 MHz):

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | fabric clock |
| `TICK_CYCLES` | 5 000 | 100 µs timestamp tick |
| `RESYNC_CYCLES` | 15 000 | 300 µs slow-package limit |
| `HOLDOFF_CYCLES` | 50 000 000 | 1 s between resyncs |
| `FAIL_CYCLES` | 250 000 | 5 ms failure timeout |
| `ASYNC_PRESCALE` | 50 | skew counter unit, 1 µs |
| `SPI_HALF` | 16 | fabric cycles per SCLK phase |
| `SPI_CS_SETUP`, `SPI_CS_HOLD`, `SPI_CS_GAP` | 32 | chip-select timers, in cycles |

`hermess_pkg` holds the shared types and constants:

* the APB request and response structs;
* the frame, status and configuration layouts;
* `N_STAMPS = 6` and `PKG_WORDS = 15`.

## Where this RTL makes its own choices

The original design defines:

* the architecture;
* the command set;
* the register, frame and package layouts;
* the limits: 100 µs, 300 µs, 1 s, 5 ms and "four or more";
* the state machine.

This RTL chose the following details itself:

* SPI mode 1, the SPI clock rate and the chip-select timer values.
* The length of pass-through transfers: always 32 bits.
* The readout order SGR1, SGR2, RTD.
* When `data_avail` rises and falls.
* The skew sign convention, the 1 µs skew unit and how RR clears.
* Byte order inside multi-byte package fields and the APB word order.
* The bit positions inside the FS byte.
* Offsets counted in timestamp ticks.
* The `cstart_n` and `hard_reset_n` pulse lengths (100 cycles).
* Failed STAMPs staying failed until a MemSync reset.
* The PSLVERR response to unmapped slots.
* The continuous-mode bit C is bit 30 and R is bit 31. The only description
  available calls C "the 30th bit" and puts the threshold in bits 29..24.

The hold-off counter starts expired, so a resync may follow right after
power-up.

Outside the fabric, and not part of this RTL:

* the MSS firmware (flash storage, telemetry, the LO/SODS/SOE control lines,
  the USB service interface);
* the converters;
* the analog front ends;
* the power supply.

## Simulation

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`. They run with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/hermess_pkg.sv tb/tb_hermess_fabric.sv --top-module tb_hermess_fabric
    ./obj_dir/Vtb_hermess_fabric +verilator+rand+reset+2

| testbench | what it covers |
|---|---|
| `tb_spi_master` | bit order, transfer length and cycle count, chip-select timers |
| `tb_apb3_bus` | slot decode in both windows, response routing, unmapped slots |
| `tb_stamp` | pass-through and polling, continuous readout against ADC models, N/O flags, skew value and RR, atomic and status-reset modifiers, soft reset |
| `tb_memsync` | every package byte, APB hold-off, missed bit, both resync triggers and the hold-off, failure timeout, hard reset, component reset |
| `tb_hermess_fabric` | end to end with 18 ADC models at scaled time constants; counts each mechanism and fails if one never happens |
| `tb_hermess_fabric_full` | the top with default parameters and real rates (2 kHz SGR, 10 Hz RTD): a STAMP-level resync, a failed STAMP, slow packages that resync exactly 1 s after the previous resync, and the hard reset; 51 M cycles, about 1.5 minutes |

`tb/ads114x_model.sv` is a behavioural model of the converter's digital
pins:

* periodic conversions with a settable phase;
* data ready that pulses and is released by the first SCLK edge;
* a START input that holds the conversion in reset;
* a busy time after calibration commands.

The testbenches create skew by holding the START input of single converters
low for a while.

Every time limit (100 µs, 300 µs, 5 ms, 1 s) is exercised at its real value
in the full-size testbench. The other testbenches scale them down through
the parameters to stay short.
