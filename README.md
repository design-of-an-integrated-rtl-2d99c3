# Four-channel acceleration acquisition: XADC to SPI in an Artix-7

This logic streams accelerometer data off an FPGA during a rocket launch. It
was built for a deployer-mounted data acquisition board for CubeSats. An
external accelerometer gives three axes plus a temperature channel. After
analog filtering, the four channels reach the FPGA's built-in ADC (the
Xilinx XADC) as differential pairs. The XADC converts them continuously:
each channel is sampled at 240.38 kHz, which is enough for vibration content
up to 100 kHz. The logic here does three things:

- It collects each set of four 12-bit results from the XADC.
- It turns each result into a 16-bit word.
- It sends the four words to a processing board over a three-wire SPI bus
  (chip select, clock, data). That board stores them in NAND flash.

The processing board only listens, so the FPGA never receives anything on
this bus.

The whole design is about one timing budget. A new set of results arrives
every **4.16 µs**: 4 channels × 26 ADC clocks × 40 ns. The bus runs at
20 MHz, so one 16-bit word takes 800 ns and a 900 ns slot with the gap
between words. Four words therefore take **3.6 µs**, and together with
reading the four results this fits inside the 4.16 µs window. There is no
buffer. Each set of results must be gone before the next one lands.

## Data path

```
            DRP (DADDR, DEN, DO, DRDY)          s_xadc0..3            DATA_IN
  XADC  <------------------------------>  reader_fsm  ------>  word_mux  ------>  spi_master_bus --> CS_B, SCLK, MOSI
  (EOS, BUSY) ----------------------------->   |  LD_BEGIN          ^ SEL              ^ LD   | BUSY
                                               +------------>  loader_fsm -------------+------+
```

| module | role |
|---|---|
| `daq_top` | Wires everything together. Brings out the XADC's DRP and status pins and the SPI bus. |
| `reader_fsm` | On end of sequence (EOS), reads the four results over the XADC's Dynamic Reconfiguration Port (DRP) and then pulses `LD_BEGIN`. |
| `loader_fsm` | Steps the multiplexer over channels 0..3 and starts one SPI transaction per channel. |
| `word_mux` | 4-to-1 multiplexer. Also builds the 16-bit word: `{HEADER, result}`, with result bit 11 inverted. |
| `spi_master_bus` | Transmit-only SPI master: an Idle/Wait/Transmit FSM, the clock divider and the shift register. |
| `clk_div5` | Divides 100 MHz by 5 to get a 20 MHz clock with 50% duty. |
| `spi_shift_reg` | 16-bit shift register, parallel in and serial out, MSB first. |
| `daq_pkg` | Widths, addresses, timing constants and the XADC configuration words. |

Everything runs on one 100 MHz clock, which is also the XADC's DRP clock
(DCLK). Reset is synchronous and active high.

## The XADC and what it must be set to

The XADC is the FPGA's hard analog block, so this RTL does not contain it.
`daq_top` exposes its pins as ports (`xadc_do`, `xadc_drdy`, `xadc_eos`,
`xadc_busy`, `xadc_den`, `xadc_daddr`). To use the design, instantiate the
XADC primitive next to `daq_top` and wire it up as follows:

- `DCLK = clk` and `RESET = reset`.
- `DWE = 0`. Only reads are made.
- `VAUXP/VAUXN[3:0]` go to the analog inputs.
- Set the `INIT_4x` attributes from `daq_pkg`:

| register | value | setting |
|---|---|---|
| 40h | `0x0000` | no averaging |
| 41h | `0x2F0F` | continuous sequence mode, alarms off, calibration off |
| 42h | `0x0400` | ADCCLK = DCLK / 4 = 25 MHz |
| 48h | `0x0000` | no on-chip sensors in the sequence |
| 49h | `0x000F` | auxiliary channels 0–3 in the sequence |
| 4Dh | `0x000F` | auxiliary channels 0–3 bipolar (differential) |

The settings themselves are part of the design. The bit encodings come from
the 7-series XADC user guide. Check them against your tool version before
you rely on them. Calibration stays out of the sequence on purpose: adding
it would halve the per-channel rate to 120 kHz.

## Reading the results: `reader_fsm`

The reader is a small state machine with one pass per channel:

1. **Init.** Wait until the XADC reports `BUSY`, which means conversions
   have started.
2. **Read, channel 0.** Hold `DADDR = 0x10` until `EOS` arrives.
3. **Read, channel k.** Put `DADDR = 0x10 + k` on the port. Load a two-bit
   register `den_reg` with binary `10`.
4. **Wait for DRDY.** While `DRDY` is low, shift `den_reg` right by one.
   `DEN` is `den_reg[0]`, so it pulses high for exactly one clock, one clock
   after this state is entered. When `DRDY` arrives, store `DO[15:4]` in
   `s_xadc[k]` (the XADC places the result in the top 12 bits of DO). Then
   go to the next channel.
5. After channel 3, pulse `LD_BEGIN` and go back to step 2.

Each channel costs 3 clocks plus the XADC's DRDY latency. From EOS to
`LD_BEGIN` that is 12 clocks plus four latencies. The reads finish long
before channel 0 of the next sequence completes, 104 clocks after EOS.

## Sending the results: `loader_fsm`, `word_mux`, `spi_master_bus`

**Word format.** Each word is `{HEADER[3:0], result[11:0]}`.

- In bipolar mode the XADC returns two's complement. By default
  (`INVERT_MSB = 1`) result bit 11 is inverted, which turns the value into
  offset binary. Zero input becomes `0x800`, and the full range runs
  monotonically from `0x000` to `0xFFF`.
- `HEADER` defaults to `0`.
- `HEADER = 4'h7` with `INVERT_MSB = 0` reproduces the bring-up setup. There
  the words drove a serial DAC directly, and `0x7` was the DAC's write
  command. For example, result `0x98E` goes out as `0x798E`.

**Loader.** On `LD_BEGIN` the loader does the following for each channel
k = 0..3:

1. Drive `SEL = k` and pulse `LOAD` for one clock.
2. Wait until the SPI master's `BUSY` goes high, then until it goes low.

`SEL` moves on in the clock after `LOAD`. So while channel k is on the wire,
`SEL` already reads k+1 (mod 4). After channel 3, `SEL` is back at 0 and the
loader idles.

**SPI master.** The master has three states:

- **IDLE:** `CS_B` high, `BUSY` low.
- **WAIT:** `CS_B` high, `BUSY` low. Lasts one SPI clock period after a load.
- **TRANSMIT:** `CS_B` low, `BUSY` high. Lasts 16 SPI clock periods, with a
  bit counter running 0..15.

`SCLK` is the divided clock, passed through only while `BUSY` is high.
`MOSI` is the MSB of the shift register. It changes just after a falling
SCLK edge, and the receiver samples it on the rising edge.

On the wire at 100 MHz:

- `CS_B` falls 15–20 ns before the first rising SCLK edge. The exact figure
  depends on the clock phase at which reset is released.
- `CS_B` stays low for 800 ns, during which SCLK rises 16 times.
- Between words, `CS_B` is high for 100 ns: one SPI period in IDLE and one in
  WAIT.
- From the first `CS_B` fall of a group to the last `CS_B` rise is 3.5 µs.
- From `LD_BEGIN` to the end of the fourth word is 356–360 clocks. The
  nominal figure is 3.6 µs; the few clocks of spread depend on where the
  load lands within the SPI clock period.

## The divide-by-5 clock

You cannot get a 50% duty cycle from an odd division by counting rising
edges alone. `clk_div5` therefore runs two modulo-5 counters, one on the
rising edge of `clk` and one on the falling edge. Each counter drives its
output high for 2 of its 5 edges and low for the other 3. The falling-edge
output lags by half a period, and the OR of the two outputs is high for 2.5
periods and low for 2.5: a 20 MHz clock with 50% duty.

The divider also gives a one-clock strobe, `fall_stb`, in the clock cycle
just after the divided clock falls. The SPI FSM and shift register advance
only on that strobe. As a result:

- their outputs and `BUSY` change only while the divided clock is low, so
  the gated `SCLK` has no glitches;
- `MOSI` is settled at least 15 ns before the next rising edge.

## Where this RTL departs from the original hardware description

- **Single clock domain in the SPI master.** In the original design the
  transmission FSM and the shift register are clocked by the divided 20 MHz
  clock, and the shift register loads asynchronously. Here both run on the
  100 MHz clock and use the divider's strobe as an enable, with a
  synchronous load. `LD` is a single 100 MHz pulse from the loader. To avoid
  losing it, the master latches an `LD` seen in IDLE and acts on it at the
  next SPI period boundary. The pins behave the same way; only the
  implementation differs.
- **First SCLK edge.** The original timing puts the first SCLK edge half an
  SPI period (25 ns) after `CS_B` falls. Here it comes 15–20 ns after.
- **End of transmission.** Its state diagram ends transmission when the bit
  count equals 15, and its text says "when the count reaches 16". Both mean
  16 bits, and that is what this RTL sends.
- **Loader states.** The loader's state encoding is this design's own,
  built from the loader's described behaviour and its simulation waveform.
  It waits for `BUSY` to rise before it waits for it to fall, because the
  master's `BUSY` is still low during WAIT.
- **No launch-enable input.** The original architecture mentions an enable
  signal from the launch vehicle. Its block diagram of the FPGA design has
  only clock and reset, and the board is powered up by a separate
  launch-detection circuit, so there is no enable input.
- **Bring-up modes not provided.** The first bring-up design sent a single
  word per sequence. A board-test variant could also feed a 12-bit value
  from switches to the SPI master in place of the XADC. This RTL has neither
  mode and always sends four words per sequence.
- **Outside the RTL.** The analog front end, the XADC reference, the
  configuration flash, the oscillator and the launch detector (a piezo
  microphone, a comparator and an S-R latch that powers the board) are board
  parts. They are not part of the RTL.

The original implementation used 85 LUTs and 107 flip-flops on an Artix-7.
This RTL has 101 flip-flop bits.

## Simulation

The testbenches in `tb/` check themselves and end with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `clk_div5_tb` | 50 ns period, 25 ns high, one strobe per period, after either reset phase |
| `spi_shift_reg_tb` | MSB-first output, hold, load priority, zero fill |
| `word_mux_tb` | both word formats; `0x98E→0x798E`, `0xE97→0x7E97`, zero → `0x800` |
| `spi_master_bus_tb` | 16 SCLK rises, 800 ns CS_B low, MOSI only changes while SCLK is low, 900 ns / 100 ns spacing back to back |
| `loader_fsm_tb` | four one-clock LOADs per START with SEL 0..3, one clock after START or BUSY falling, START ignored mid-round |
| `reader_fsm_tb` | no reads before BUSY, DADDR 0x10..0x13 in order, one-clock DEN, DO[15:4] latched, exact EOS-to-LD_BEGIN clock count |
| `daq_top_tb` | default parameters, 200 sequences: every word's value, bus timing, each group done before the next EOS; counts each mechanism (BUSY wait, slow DRDY, held load, WAIT gap, both sign-bit values) |
| `daq_top_stim_tb` | `HEADER = 7`, `INVERT_MSB = 0`, unipolar codes from a recorded three-axis stimulus (0.6070 V, 0.5992 V, 0.5982 V, silent fourth channel) must come out as `0x79B6 0x7996 0x7992 0x7000` |
| `daq_top_dac_tb` | `HEADER = 7`, `INVERT_MSB = 0`, only channel 2 carries a signal: words `0x7000` and `0x7` + sample |

`tb/xadc_model.sv` is a behavioural stand-in for the XADC in continuous
sequence mode:

- 104 clocks per conversion;
- `EOC`/`EOS` pulses and `BUSY` after a start-up delay;
- DRP reads answered after 1–4 clocks;
- sample values from a hash of sequence number and channel, so checkers can
  predict them, or (with `EXT = 1`) codes supplied by the testbench on
  `ext_val`.

Run a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module daq_top_tb \
  -Irtl -Itb rtl/daq_pkg.sv rtl/*.sv tb/xadc_model.sv tb/daq_top_tb.sv
./obj_dir/Vdaq_top_tb
```

The testbenches give delays in nanoseconds, hence `--timescale`. For a unit
testbench, replace the last file and the top-module name. Every
simulation finishes in seconds.
