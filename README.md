# Digital core of a fast digital integrator for magnetic measurements

A coil moving in (or sitting in) a magnet produces a voltage whose time
integral is the change of magnetic flux. This core digitizes that voltage
continuously with an 18-bit ADC and integrates it **between consecutive
trigger pulses** (typically angular encoder pulses of a rotating coil). Each
trigger releases one *flux increment* together with the exact time of the
trigger. The increments go into an on-chip buffer. A PCI/PXI bridge (a PLX
PCI 9056) moves them to the host by DMA over a 32-bit, 40 MHz local bus.

The design follows the enhanced Fast Digital Integrator (eFDI) developed for
magnet measurements at CERN: its time base, trigger measurement, integration
principle, buffer size and bus interface. On that instrument the integration
runs as DSP software. Here it is logic, so the core works without a DSP
program. Everything the published design leaves open has been decided here:
the interfaces, the encodings, the register map, reset behaviour and error
handling. The sections below say which parts are which.

```
 trig_in ─► time_measurement ──tag──┐
              ▲ tick, phase, UTC    ▼
 25 MHz ─► timebase ──tick──► adc_if ──sample──► online_integrator ──result──► record_packer
              │                 ▲ ▼ ADC pins                                        │ 4 x 32-bit
              └─ dsp_clk        │                                                   ▼
                                                           dpram_fifo (4096 x 32, 25 MHz → 40 MHz)
                                                                                    │
 DSP SPI ─► spi_dispatch ─► DAC VREF+, DAC VREF-, flash, memory   local_bus_slave ◄─┘ ◄─► PCI 9056
```

## The integration between triggers

This is the part that takes the most care. The ADC samples at instants
s_j = j·T, where T is the sample period in UTC ticks (`div`; 50 ticks at
500 kS/s). The integrator treats sample V_j as the value of the signal
over the whole interval (s_{j-1}, s_j] that *ends* at its conversion start.
This is a sample-and-hold picture. An integral is the area under that
staircase between two trigger instants t_{k-1} and t_k.

The two ends of an integral rarely coincide with samples. Say trigger t_k
falls inside the interval of sample V_j. Then:

```
            s_{j-1}          t_k              s_j
  ... ───────┼────────────────┼────────────────┼───── time (UTC ticks)
             │<──── tau_b ───>│<──── tau_a ───>│
             │     V_j held over the whole interval
             │  part of ΔΦ_k  │ part of ΔΦ_k+1 │
```

- `tau_b` is the number of UTC ticks from s_{j-1} to the trigger. It lies
  in 1 … T.
- `tau_a = T − tau_b` is what is left of the interval after the trigger.

The integrator adds `V·T` for every sample that lies wholly inside the
integral. For the sample that holds the trigger it does two things:

- it releases `ΔΦ_k = acc + V_j·tau_b`, stamped with t_k;
- it restarts the accumulator at `V_j·tau_a`.

Nothing is lost or counted twice at the boundary. A trigger can coincide
with a sample, which always happens with the internal trigger. Then
tau_b = T and tau_a = 0.

Rules that follow from this:

- **Units.** An increment is in ADC LSB × UTC ticks (40 ns). Software
  scales it to V·s with the gain of the ADC and the analog chain.
- **The first trigger after `run` rises** only opens an integral. The
  stretch before it is incomplete, so it is not released.
- **Trigger rate.** There may be at most one trigger per sample interval
  (f_ADC ≥ 2·f_trigger). A second trigger within one interval is dropped,
  and the sticky *trigger overrun* flag is set.
- **Resolution.** Trigger times and residual times are whole UTC ticks.
  Nothing interpolates below 40 ns.
- **Digitizer mode** (`CTRL[1]`) bypasses the integration. Every sample is
  released as a record, with the time of its conversion start.

Per sample, the datapath (`online_integrator`) needs three 18×17-bit
products and one 64-bit add. At 25 MHz this is far from critical. The 64-bit
accumulator holds more than 10⁵ s of full-scale input at 500 kS/s.

## Time base and trigger timing

`timebase` counts the 64-bit universal time counter (UTC). It increments on
every edge of the 25 MHz crystal clock, from zero at reset. The ADC
sampling clock comes from the same counter. While `run` is high, `adc_tick`
pulses once every `div` cycles. The first pulse comes on the div-th cycle
with run high. `phase` counts the cycles since the last tick, and the tick
cycle has phase = div−1. So a trigger seen on a cycle with phase p has
tau_b = p + 1. Any integer div ≥ 2 is accepted, giving 25 MHz / div
(div = 50, 100, 200 for 500, 250, 125 kS/s). `dsp_clk` is the clock divided
by two (12.5 MHz).

`time_measurement` takes triggers from two sources:

- **External** (`trig_in`): a two-flip-flop synchronizer and a rising-edge
  detector. The time stamp is the UTC value two cycles after the pin rose.
  This offset is constant, so it cancels in the increments.
- **Internal** (`CTRL[2]`): every `OSR`-th sample tick is a trigger. This
  gives fixed-rate integration, e.g. 500 kS/s with OSR = 500 gives 1000
  increments/s.

A trigger stays pending until the next sample tick. One cycle after each
tick, the block hands the integrator a tag that holds the trigger flag,
tau_b, the trigger time and the sample's own time. The ADC result for that
sample arrives later, before the next tick. So the integrator always has
the right tag when the sample comes.

## ADC read-out

`adc_if` drives an 18-bit parallel SAR converter:

1. Each tick pulls CNVST# low for 2 cycles.
2. The block waits for BUSY to rise and fall. BUSY is synchronized with two
   flip-flops. If BUSY never rises, the block gives up after 255 cycles.
3. CS# and RD# go low for 2 cycles, and the code (two's complement) is
   latched on the last one.

The latency from tick to sample is about 22 cycles with a 0.6 µs
conversion, so the sample period must be longer than that. If a tick comes
while a read-out is still running, no conversion is started and the sticky
*ADC overrun* flag is set.

## Records and the acquisition buffer

`record_packer` writes each result as four 32-bit words, most significant
word first:

| word | content |
|------|---------|
| 0 | bit 31: 1 = raw ADC sample, 0 = flux increment; bits 30..0: UTC[62:32] |
| 1 | UTC[31:0] (trigger time, or sampling time for raw samples) |
| 2 | value[63:32] (signed) |
| 3 | value[31:0] |

A record is started only when the buffer has room for all four words, so
the host always reads whole records. A result that finds no room is
dropped: the sticky *overflow* flag is set and the `DROPS` counter
advances. The buffer then keeps the oldest data.

`dpram_fifo` is the 16 kB buffer: 4096 × 32 bits in a dual-port RAM. It is
written in the 25 MHz domain and read in the 40 MHz bus domain. The
pointers cross between the two as Gray code through two-flip-flop
synchronizers. The read side is first-word-fall-through. The RAM has a
registered read port, which is read every cycle at the next read pointer,
so it maps onto block RAM. The fill levels on each side are conservative by
two to three cycles.

## Host interface: the local bus

The PCI 9056 is the master on a 32-bit multiplexed local bus at 40 MHz, and
the core is a target. A transfer works like this:

1. The master pulls ADS# low for one cycle with the byte address on LAD.
   LW/R# gives the direction (1 = write).
2. In every data phase the core answers with READY# low.
3. The master marks the last data phase with BLAST# low.

Bursts of any length are accepted, and the address advances by 4 per data
phase. LAD is split into `lad_in`, `lad_out` and `lad_oe` for a tri-state
pad at the top of the chip.

| address | name | access | content |
|---------|------|--------|---------|
| 0x0000 | CTRL | r/w | [0] run, [1] digitizer mode, [2] internal trigger |
| 0x0004 | DIV | r/w | sample period in UTC ticks (reset 50 = 500 kS/s) |
| 0x0008 | OSR | r/w | samples per internal trigger (reset 500) |
| 0x000C | SPISEL | r/w | SPI target: 0 DAC VREF+, 1 DAC VREF−, 2 flash, 3 memory |
| 0x0010 | RELAY | r/w | 16 drive bits for the analog front-end relays |
| 0x0014 | STATUS | r | [12:0] buffer fill in words, [16] overflow, [17] trigger overrun, [18] ADC overrun, [19] run |
| 0x0018 | ID | r | 0xEFD10001 |
| 0x001C | TRIGS | r | triggers accepted in the current or last run |
| 0x0020 | DROPS | r | results dropped in the current or last run |
| 0x8000–0xFFFF | buffer window | r | each data phase pops one buffer word |

Reading the buffer window is how DMA moves data: a burst of N data phases
moves N words at one word per cycle, i.e. 160 MB/s on the local bus. If the
buffer runs empty in the middle of a burst, the core holds READY# high
(wait states) until a word arrives. So a host should read STATUS first and
ask for at most the fill level.

A typical run:

1. Write DIV and OSR.
2. Write CTRL with run = 1.
3. Read STATUS from time to time and move that many words out of the window.
4. Write CTRL with run = 0.
5. Read TRIGS and DROPS.

The sticky flags and both counters are cleared when run rises.

## SPI dispatch

The DSP is the only SPI master on the board. It programs the two 20-bit
reference DACs used for self-calibration, one for VREF+ and one for VREF−,
and also reaches a flash and a memory. `spi_dispatch` forwards CS#, SCLK
and MOSI only to the target selected in SPISEL. The other targets see CS#
high and SCLK and MOSI low. The selected target's MISO goes back to the
DSP. A new selection takes effect only while the DSP's CS# is high, so a
frame is never split between targets. The signal paths are combinational;
only the selection is clocked. On the instrument's board the ADC also sits on
the SPI bus; its use there is not documented, so it is not a target here.

## Clock domains

- `clk` (25 MHz UTC) runs the whole acquisition chain.
- `lclk` (40 MHz) runs the bus target.

Only these signals cross between the domains:

- the buffer (Gray-coded FIFO);
- the run bit and the three sticky flags (two-flip-flop synchronizers each).

DIV, OSR, the mode bits, SPISEL and RELAY are used in the 25 MHz domain
without synchronization. Write them only while run is low. TRIGS and DROPS
are also read without synchronization, and are valid once run has been low
for a few cycles.

## Sizes against the instrument's operating points

- **Buffer and throughput.** The buffer is 16 kB, the buffer size of the
  instrument's throughput test. That test measured 107 MB/s over PXI. The
  local-bus side here delivers up to 160 MB/s in bursts. The PCI side
  (33 MHz × 32 bits) belongs to the bridge.
- **Integrator at 500 kS/s, OSR 500.** This means DIV = 50 and OSR = 500,
  i.e. 1000 increments/s = 16 kB/s of records.
- **Rates 125/250/500 kS/s with OSR 125/250/500.** These are DIV =
  200/100/50.
- **15 kS/s digitizer.** 25 MHz / 15 kHz is not an integer. DIV = 1667
  gives 14.997 kS/s.
- **Fastest triggers.** The highest trigger rate allowed by f_ADC ≥ 2·f_t
  at 500 kS/s is 250 kHz, i.e. 4 MB/s of records.

## What is not in this RTL

The board around the core is not modelled in RTL:

- the analog front end (input impedance and dividers, protection, PGA,
  anti-alias filter) and its relays;
- the ±10 V reference and the two DACs;
- the ADC;
- the 25 MHz oscillator;
- the DSP, its 16-bit parallel bus and its 20-bit DAI bus;
- the SDRAM;
- the display controller and its UART;
- the flash and the bridge EEPROM.

The self-calibration procedure itself (linear regression over gains, input
impedances and DAC voltages) is DSP software. The core only gives it the
SPI path to the DACs and the relay register.

Where this core departs from the instrument, or fills a gap:

- **Integration.** It is done in logic, with the sample-and-hold split
  described above. The instrument does it in DSP software and does not
  publish the exact interpolation formula.
- **Triggers.** The internal trigger, the overrun rules and the discarded
  first interval are choices made here.
- **Interfaces and register map.** The record format, register map, ADC
  handshake, SPI selection rule, reset values, wait-state rule and drop
  policy are choices made here. The local-bus signal names are the
  bridge's.
- **Sampling rate.** The divider takes any integer. The earlier instrument
  offered 8 fixed rates.

## Files

`rtl/`:

- `efdi_pkg.sv`: widths, the result and tag structs, the register map and
  the SPI target enum.
- `efdi_fpga.sv`: the top.
- `timebase.sv`, `time_measurement.sv`, `adc_if.sv`,
  `online_integrator.sv`, `record_packer.sv`, `dpram_fifo.sv`,
  `local_bus_slave.sv`, `spi_dispatch.sv`: the blocks.
- `sync2.sv`: the two-flip-flop synchronizer.

Every module has a default for each parameter. The top's only parameter is
`FIFO_DEPTH` (4096 words).

`tb/` has one self-checking testbench per block (`<module>_tb.sv`) and
`ad7634_model.sv`, a behavioural model of the converter with CNVST#, BUSY,
CS# and RD#. Each testbench compares the block with values it works out
itself, has a watchdog, and ends with a line
`TB_RESULT checks=N failures=M`.

- `online_integrator_tb` sums the held signal one UTC tick at a time,
  without multiplication, between random trigger times.
- `efdi_fpga_tb` runs the whole core at its default size, as a local-bus
  master and ADC/trigger/SPI environment. It covers external triggers,
  internal triggers, digitizer mode, wait states on an empty buffer, buffer
  overflow, trigger overrun, ADC overrun and SPI routing. It checks every
  increment against a tick-by-tick reference built from its own log of
  conversions, and runs in about 10 s.

- `efdi_workloads_tb` runs the core on the instrument's operating points:
  integrator mode at 125, 250 and 500 kS/s with OSR 125, 250 and 500 on a
  7 Hz, 8 Vpp sine, one increment per millisecond. Each increment is checked
  exactly against the tick-by-tick sum and against the analytic integral of
  the sine. It also fills the 16 kB buffer and reads it out in 256-word
  bursts, at 158.6 MB/s on the local bus (at least 100 MB/s is required).

To run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/efdi_pkg.sv tb/efdi_fpga_tb.sv --top-module efdi_fpga_tb -Mdir obj
./obj/Vefdi_fpga_tb
```

Replace `efdi_fpga_tb` with any other testbench name. For lint only, run
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/efdi_pkg.sv rtl/efdi_fpga.sv`.
The remaining lint warnings concern package constants and signals that a
given module does not use: `wr_full` (records are admitted by `wr_free`)
the `active` selection output of the SPI dispatcher, and LAD[31:16] in the
address phase (only a 64 kB local address space is decoded).
