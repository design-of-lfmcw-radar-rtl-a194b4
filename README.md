# FPGA logic for an LFMCW radar level gauge

An LFMCW (linear frequency-modulated continuous-wave) radar measures the
distance to the surface of a liquid or bulk solid in a tank. A VCO is swept
linearly in frequency by a sawtooth voltage. The echo from the surface is mixed
with the transmitted signal. The resulting beat (IF) frequency is proportional
to the distance: R = c * f_beat * T_sweep / (2 * B_sweep). Real VCOs tune
non-linearly, so the sawtooth has to be pre-distorted ("linearity
correction") or the beat spectrum smears.

This RTL is the FPGA half of such a gauge. The chip holds a small Nios II
system: a soft CPU with on-chip memories, external SRAM and flash, a debug
UART, an RS485 field-bus UART, a tick timer, and parallel ports for a 4x4
keypad, a sound alarm and a 128x64 graphic LCD. Two converter paths are added
to it:

* **A/D path.** An AD9226 12-bit ADC digitises the conditioned beat signal.
  The A/D control module (`ad9226_ctl`) clocks the converter and captures its
  samples. The CPU reads them through `ad_pio`.
* **D/A path.** A D/A converter produces the VCO sweep voltage. The D/A
  conversion module (`da_conv`) plays a corrected sawtooth table that software
  loads through `da_pio`. The module marks the start of every sweep, and that
  mark interrupts the CPU, so sampling can be tied to the sweep.

Software closes the loop. It runs acquisition, FFT power-spectrum estimation,
linearity correction, display, keypad and RS485 communication in one endless
main loop. The CPU core is not part of this RTL (see "What is outside" below).
Its data master and interrupt lines are ports of the top level, so a
testbench or a CPU model can drive the system exactly as the processor
would.

## Block map

```
          cpu_req/cpu_rsp (Nios II data master)        cpu_irq[6:0]
                    |                                        ^
              avalon_fabric  (address decode, read mux)      |
   +------+------+------+-----+------+------+-----+-----+----+--+------+
   |      |      |      |     |      |      |     |     |       |      |
 flash   sram  onchip onchip uart1 Timer1 uart_  key_  lcd_   ad_pio  da_pio
   \      /     RAM    ROM               rs485  pio   pio      ^       |
 tristate_bridge                                               |       v
   |  shared 16-bit external bus                     ad9226_ctl   da_conv
   v                                                     ^        |     |
 SRAM, flash chips                                   AD9226     DAC  sweep flag
                                                                      -> ad_pio[15]
 (cpu_dbg and sysid ranges are decoded and brought out as port pairs)
```

| Module | Role |
|---|---|
| `sopc_pkg` | Bus structs, slave enum, address map, IRQ numbers, register offsets, PIO bit fields |
| `lfmcw_sopc_top` | Top level: instantiates and wires everything below |
| `avalon_fabric` | Single-master Avalon-MM interconnect |
| `ad9226_ctl` | A/D control module for the AD9226 |
| `da_conv` | D/A conversion module: sweep-table player |
| `avalon_pio` | Parallel port, used four times |
| `avalon_uart` | 8N1 UART, used twice (debug and RS485) |
| `interval_timer` | 32-bit system tick timer |
| `onchip_mem` | On-chip RAM and boot ROM |
| `tristate_bridge` | Bridge to the shared external SRAM/flash bus |

## Address map and interrupts

All addresses are byte addresses on the CPU data master. The clock is 50 MHz.

| Slave | Base | Last | IRQ | Built here |
|---|---|---|---|---|
| ext_flash | 0x000000 | 0x1FFFFF | - | through `tristate_bridge` |
| ext_ram (SRAM) | 0x200000 | 0x2FFFFF | - | through `tristate_bridge` |
| onchip_RAM | 0x300000 | 0x300FFF | - | `onchip_mem`, 4 KB |
| cpu (debug slave) | 0x301000 | 0x3017FF | - | port pair `cpu_dbg_*` |
| uart1 | 0x301800 | 0x30181F | 0 | `avalon_uart` |
| Timer1 | 0x301820 | 0x30183F | 1 | `interval_timer` |
| uart_rs485 | 0x301840 | 0x30185F | 4 | `avalon_uart` |
| key_pio | 0x301860 | 0x30186F | 2 | `avalon_pio`, 5 bits |
| lcd_pio | 0x301870 | 0x30187F | 3 | `avalon_pio`, 14 bits |
| ad_pio | 0x301880 | 0x30188F | 5 | `avalon_pio`, 16 bits |
| da_pio | 0x301890 | 0x30189F | 6 | `avalon_pio`, 32 bits |
| sysid | 0x3018A0 | 0x3018A7 | - | port pair `sysid_*` |
| onchip_ROM | 0x303000 | 0x303FFF | - | `onchip_mem`, 4 KB, read-only |

An access outside every range completes at once with zero data. It raises
`decode_error` for the clock it is on the bus.

## Bus protocol

The interconnect carries a subset of Avalon-MM in two packed structs from
`sopc_pkg`:

* `av_req_t`: `address`, `read`, `write`, `byteenable`, `writedata`.
* `av_rsp_t`: `readdata`, `waitrequest`.

The master holds its request until `waitrequest` is low. In that clock,
`readdata` is valid and the transfer is complete. The fabric is purely
combinational. It hands each slave an address relative to the slave's base.

Access times, counting the clock in which the request is taken:

| Target | Read | Write |
|---|---|---|
| Register slaves (PIO, UART, timer) | 1 clock | 1 clock |
| On-chip memory | 2 clocks | 1 clock |
| External SRAM/flash, `WAIT_CYCLES` = 4 | 12 clocks | 12 clocks for both halves, 7 for one half |

## The A/D control module (`ad9226_ctl`)

The module has five ports: `data_of_ad[11:0]`, `clk_state`, `start`, `clk`
and `q[11:0]`. It adds one more, `sample_phase`.

* `clk` is `clk_state`, passed straight through to the converter.
* On each **falling** edge of `clk_state` with `start` high, `q` takes
  `data_of_ad` and a nine-state counter (ST0..ST8) advances.
* With `start` low, `q` and the counter hold.

The AD9226 changes its output bus after the rising clock edge. Sampling on the
falling edge therefore catches a settled word, and `q` trails the converter
bus by one clock. The nine states behave identically, as in the original
module. The state index appears on `sample_phase` so that software can tell
consecutive samples apart.

The module has no reset. The state starts at ST0 and `q` at zero from their
declaration values, as an FPGA register does at configuration. In the top, the
converter runs on the 50 MHz system clock. `ad_pio` (input bits 11:0) reads
`q` through a two-flop synchroniser, and `ad_pio` output bit 12 is `start`.

A PIO read returns one sample at a time. At 50 MSPS the CPU cannot read every
sample through it. Software therefore takes samples at its own pace, starting
at the sweep-start interrupt. A FIFO or DMA path for full-rate capture is not
part of this design.

## The sweep generator (`da_conv`) and sweep synchronisation

`da_conv` holds a table of `DEPTH` (256) samples of `DAC_W` (12) bits. It plays
the table round and round: one entry every `STEP_DIV` (50) clocks. At 50 MHz
that is a 1 us step and a 256 us sawtooth. Each entry is put on `dac_data`
with a one-clock `dac_wr` strobe. The wrap from the last entry back to entry 0
is the flyback of the sawtooth.

Software loads the table through the 32-bit `da_pio` output word:

| Bits | Meaning |
|---|---|
| [11:0] | Entry value |
| [23:16] | Entry address |
| [24] | Write strobe: a rising edge writes the entry |
| [25] | Run |

To load an entry, write the word with bit 24 low, then again with bit 24 high.
While run is low, the DAC output rests and the step counter is cleared. The
first entry goes out one clock after run rises.

`sweep_start` pulses with entry 0. In the top, the pulse is stretched into a
flag that lasts one sweep step and is fed to `ad_pio` input bit 15. With bit
15 set in `ad_pio`'s irqmask, the CPU gets IRQ 5 once per sweep.

## PIO pin use

Each `avalon_pio` has four registers, at word offsets 0 to 3:

* **data**: reads the synchronised inputs; a write sets the output latch.
* **direction**: drives `out_oe`.
* **irqmask**: selects which inputs can interrupt.
* **edgecapture**: set by rising input edges; writing 1 clears a bit.

| Port | Inputs | Outputs |
|---|---|---|
| key_pio | [3:0] keypad columns (pulled high, low when a key in the driven row is down) | [3:0] keypad rows, [4] alarm enable |
| lcd_pio | [7:0] LCD data bus | [7:0] data, [8] RS, [9] RW, [10] E, [11] CS1, [12] CS2, [13] RST_n; `lcd_data_oe` = direction bits 7:0 all set |
| ad_pio | [11:0] captured sample, [15] sweep flag | [12] START |
| da_pio | - | control word of `da_conv` |

## Other peripherals

* **UART** (`avalon_uart`). Registers at word offsets 0 to 4: rxdata, txdata,
  status, control, divisor. Status bits: FE 1, ROE 3, TMT 5, TRDY 6, RRDY 7.
  Control bits: IROE 3, ITRDY 6, IRRDY 7. A bit lasts divisor+1 clocks. The
  reset divisor gives 115200 baud. `tx_en` is high for a whole frame and
  drives the RS485 transceiver's driver enable.
* **Interval timer** (`interval_timer`). Registers: status (TO, RUN), control
  (ITO, CONT, START, STOP), periodl and periodh. A timeout comes every period+1
  clocks. The reset period is 1 ms.
* **On-chip memory** (`onchip_mem`). A 32-bit block RAM with byte enables and
  a registered read. With `WRITABLE = 0` it is the boot ROM: it ignores writes
  and loads `INIT_FILE` with `$readmemh`. In the top, no boot image is given,
  so the ROM reads zeros. The top's `BOOT_IMAGE` parameter names an image for it.
* **Tristate bridge** (`tristate_bridge`). A 16-bit shared bus with a chip
  select per chip. Each chip cycle holds address, chip select and OE/WE for
  `WAIT_CYCLES` clocks, followed by one turn-around clock. A 32-bit transfer is
  two half-word cycles, low half first. A write skips a half whose byte
  enables are zero. The data bus appears as `ext_dq_out`, `ext_dq_oe` and
  `ext_dq_in`; the tristate buffers belong in the pads.

## What is outside this RTL

These parts are not in the RTL:

* **Nios II core.** Its data master and IRQ lines are top-level ports. Its
  debug slave range is a port pair.
* **System-ID peripheral.** A port pair.
* **DSP module.** Its function is not specified; the FFT runs in software.
* **Off-FPGA parts:**
  * radar transmitter/receiver and VCO
  * IF preamplifier, matched filter and AGC amplifier
  * the AD9226 and the D/A converter chips
  * SRAM and flash chips
  * the SN65LBC184 RS485 transceiver
  * the GDM12864A LCD
  * the keypad and the 555 alarm

## Where this design makes its own choices

The system structure, the address map, the IRQ numbers, the 50 MHz clock, the
12-bit AD9226 interface and the A/D control module's behaviour follow the
published system. The following are choices of this implementation:

* The bus subset and its timing.
* The register sets of the PIO, UART and timer. They follow the usual
  components of this kind.
* All PIO pin assignments.
* The whole inside of `da_conv`: table, control word, 12-bit width, 256
  entries and step rate. Only the block's function (a corrected sawtooth to
  the VCO through a D/A converter) is given.
* The sweep flag into `ad_pio`.
* The 16-bit external bus and its cycle length.
* Clocking the ADC from the system clock.
* Registering `q` on the falling edge, together with the state, rather than
  latching it while `start` is high. This gives `q` its intended one-sample
  lag behind the converter bus.
* The extra `sample_phase` output of `ad9226_ctl`.

## Simulation

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb_lfmcw_sopc_top` runs the whole system at its default parameters. Acting as
the CPU, it:

* loads a 256-entry corrected sweep table and starts the sweep
* checks every DAC write for value and 50-clock spacing
* takes samples on sweep interrupts and checks capture and hold
* scans the keypad and drives the LCD and the alarm
* loops both UARTs back, including RS485 direction control
* exercises SRAM and flash through the bridge, the on-chip RAM and the ROM
* runs the tick timer

It counts each of these mechanisms and fails if one never happens.

Run from the project root. The ROM test reads `tb/tb_onchip_rom.hex` by a
relative path.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/sopc_pkg.sv tb/tb_lfmcw_sopc_top.sv \
  --top-module tb_lfmcw_sopc_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one: `tb_ad9226_ctl`, `tb_da_conv`,
`tb_avalon_fabric`, `tb_avalon_pio`, `tb_avalon_uart`, `tb_interval_timer`,
`tb_onchip_mem` or `tb_tristate_bridge`. The full-system test takes a few
seconds.

## How far to trust it

* Every testbench passes. Each has been shown to catch a seeded fault in its
  module, for example a wrong sweep step length, a UART bit one clock too
  long, or swapped interrupt lines in the top.
* The bridge and the on-chip memory assert the Avalon rule that a master holds
  its request while `waitrequest` is high. The interconnect asserts that no
  address is claimed by two slaves.
* The bus models in the testbenches are this design's own. Nothing has been
  run against a real Nios II or real converter chips.
* The AD9226 timing is modelled only as "output changes a few ns after the
  rising clock".
