# Wide-range neutron flux channel: DSP system on chip

A fission chamber near a reactor core has to be read over about ten decades
of neutron flux. At low flux its output is a train of separate pulses, and the
pulse count rate measures the flux. At high flux the pulses pile up into a
noisy current. Campbell's theorem then gives the flux: the variance of that
current is proportional to it. The two methods overlap by about two decades.
This RTL is the digital core of such a "Campbellian" wide-range channel. It:

* counts discriminator pulses over a variable counting window;
* squares and averages samples of the band-passed fluctuation signal;
* decides every 5 ms which of the two to trust;
* turns the chosen value into log10 flux and a rate of change in decades per
  second;
* compares both with trip thresholds and raises a trip request;
* serves the results and all settings to a host over a VME bus and a serial
  link, and drives two analog monitor DACs (LOG and RATE).

The system is split into two sections, each with its own WISHBONE bus:

* The **processing section** (bus I) holds the two front ends, the
  signal-processing sequencer and the trip logic.
* The **communication section** (bus II) holds the UART, the VME slave, the
  monitor DAC driver and the command sequencer.

The two sections share nothing but a bridge of two dual-port RAMs:

* the **CP port** carries configuration from communication to processing;
* the **PC port** carries results from processing to communication.

This split lets each section sit in its own small FPGA.

```
 pulse_in ─► pulse_channel ─┐                                 ┌─ uart ◄─► RS-422
 ADC ◄─────► campbell_channel┤ bus I        ww_bridge        bus II ├─ vme_wb_bridge ◄─► VME
                            ├─ signal_processor ─ CP/PC ports ─ comm_processor
             trip_logic ◄───┘ (FR, HP, HR)                    └─ monitor ─► 2 serial DACs
```

## The measurement chain, one 5 ms pass

`signal_processor` is a hard-wired sequencer, a finite-state machine with a
watchdog. It runs one pass every `POLL_CYCLES` clocks (100 000 clocks = 5 ms
at 20 MHz). Each pass:

1. Reads the 32-byte configuration block from the CP port.
2. Reads the last results of both front ends. It then writes their settings
   (target count, discriminator threshold, amplifier gain) and *polls* them.
   The poll starts each front end's next integration.
3. Gives the Campbell mean square to `channel_switch`:
   * above `VMAX`, the Campbell channel is used and the fluctuation-range
     flag FR is set;
   * at or below `VMIN`, the pulse channel is used;
   * in between, the previous choice holds.

   With this hysteresis, rising flux stays on pulses until `VMAX` and falling
   flux stays on Campbell until `VMIN`. The Campbell value always decides,
   because the pulse count becomes ambiguous once pulses pile up: it falls
   again at very high flux.
4. Takes log10 (`log10_unit`) of the chosen value. On the pulse channel it
   also subtracts log10(N), N being the number of counting periods in the
   window, so the pulse value is a count rate. It then adds the channel's
   calibration offset (`CFG_POFS` or `CFG_COFS`, Q16.16 decades). All scaling
   is thus an addition in the log domain.
5. Low-pass filters the log stream (`lowpass_filter`, y += (x−y)/2^k). The
   rate is the first difference of the filtered stream times the sampling
   rate (`rate_filter`, ×200 gives decades/s).
6. Sets HP = log > `CFG_HP` and HR = rate > `CFG_HR`. FR, HP and HR go to
   `trip_logic`.
7. Converts log and rate to IEEE-754 single precision (`fix2float`,
   truncating). It writes them to the PC port with the status byte, the raw
   values, a sequence number and an echo of the configuration in use.

A pass takes about 300 clocks. The first pass after reset stops after step 2:
no integration has run yet, and a zero result would preload the filter and
fake a large rate.

### Pulse channel: one period or many

`pulse_channel` counts synchronised rising edges of `pulse_in` for one
integration period of 1/256 s (`PERIOD_CYCLES` = 78 125 clocks). Each poll
starts the period. At the end of the period it stores the count into a
history RAM that holds the last `NMAX` = 256 period counts. It then walks
backwards through the history: it adds periods until the sum reaches the
target count (`CFG_TGT`, default 400, about 5 % Poisson uncertainty) or the
history is exhausted.

* When one period already reaches the target, the channel is in *one-period
  mode*: the window is 1/256 s.
* At low count rates the window grows in 1/256 s steps, up to 1 s. This is
  *multi-period mode*.

The window sum (24 bits) and N−1 are the results. The window therefore
trades response time against statistical scatter automatically. The
per-period counter (16 bits) saturates.

### Campbell channel

After a poll, `campbell_channel` issues `NSAMP` = 1024 convert strobes, one
every `SAMPLE_CYCLES` = 64 clocks, and accumulates the squares of the signed
12-bit samples. An acquisition takes 3.28 ms, inside the 1/256 s period. The
result is the mean square, with the sum shifted right by 10 and kept to 24
bits. The analog band-pass in front of the ADC removes the mean, so the mean
square is the variance. The ADC model assumed is: `adc_convst` is a one-clock
strobe, and the ADC answers with `adc_drdy` for one clock together with
`adc_data`.

## Number formats

| Quantity | Inside | At the outputs |
|---|---|---|
| log10 flux | signed Q16.16 decades | float32 |
| rate | signed Q16.16 decades/s, saturating | float32 |
| pulse sum | 24-bit unsigned counts | 3 raw bytes |
| Campbell mean square | 24-bit unsigned, LSB² | 3 raw bytes |
| LOG DAC | — | 12 bits: (log − LOG_MIN)·409 |
| RATE DAC | — | 12 bits: 2048 + 1023·rate |

`log10_unit` finds the leading one of the 32-bit argument, which gives the
integer part of log2. It then squares the normalised mantissa 20 times, one
result bit per square. It multiplies the log2 by log10(2) = 0x4D104D42 (2^−32
units). It takes 22 clocks, and log10(0) is returned as 0.

## Bus I and bus II register maps

Both buses are shared WISHBONE buses with one master, 8-bit address and 8-bit
data. Slaves acknowledge one clock after the strobe. `wb_intercon` decodes
by base and mask, and answers unmapped addresses with ack and data 0.

| Bus I | Address | Content |
|---|---|---|
| pulse | 0x00 | W bit0: poll |
| | 0x01 | R status: bit0 ready, bit1 multi-period |
| | 0x02–0x04 | window sum, LSB first |
| | 0x05 | N−1 |
| | 0x06/0x07 | target count |
| | 0x08 | threshold DAC code |
| Campbell | 0x10 | W bit0: poll |
| | 0x11 | R status: bit0 ready |
| | 0x12–0x14 | mean square |
| | 0x15 | gain DAC code |
| CP port (read) | 0x40–0x5F | configuration |
| PC port (write) | 0x80–0xBF | results |

| Bus II | Address | Content |
|---|---|---|
| UART | 0x00 | data: read pops rx, write sends |
| | 0x01 | status: bit0 rx valid, bit1 tx busy, bit2 overrun |
| VME bridge | 0x10 | bit0 command pending |
| | 0x11–0x13 | opcode, address, data |
| | 0x14 | W response |
| | 0x15 | W done |
| | 0x18–0x1F | result bytes for VME |
| monitor | 0x20–0x27 | log and rate float bytes |
| | 0x28 | W start, R busy at 0x29 |
| CP port (write) | 0x40–0x5F | configuration |
| PC port (read) | 0x80–0xBF | results |

### Configuration block (CP port, byte offsets)

| Offset | Field | Default |
|---|---|---|
| 0 | VMIN, 24 bits | 0x000400 |
| 4 | VMAX, 24 bits | 0x004000 |
| 8 | pulse offset, Q16.16 | 0 |
| 12 | Campbell offset, Q16.16 | −1.0 |
| 16 | HP threshold, Q16.16 decades | 9.0 |
| 20 | HR threshold, Q16.16 decades/s | 1.0 |
| 24 | low-pass shift k | 2 |
| 25 | trip mask: bit0 HP, 1 HR, 2 rv0, 3 rv1, 4 FR | 0x0F |
| 26 | gain DAC code | 0x80 |
| 27 | target count, 16 bits | 400 |
| 29 | threshold DAC code | 0x40 |

Multi-byte fields are little-endian. The communication section writes the
defaults (`wrnd_pkg::cfg_default`) after reset.

PC port layout:

* 0–31: echo of the configuration in use.
* 32: log float.
* 36: rate float.
* 40: status (bit0 FR, bit1 HP, bit2 HR, bit3 trip).
* 41: N−1.
* 42–44: pulse sum.
* 45–47: Campbell mean square.
* 48: sequence number.

## Host commands

`comm_processor` writes the configuration, then loops:

1. scan the UART;
2. scan the VME mailbox;
3. when neither holds a command, refresh the monitor DACs and the VME result
   words.

UART (8N1, `CLK_DIV` = 174 gives 115 200 baud at 20 MHz) and VME take the
same commands:

| Command | Bytes | Answer |
|---|---|---|
| parameter write | `'W'` addr data | `'K'` (CP byte addr ← data) |
| parameter read | `'R'` addr | PC byte addr (0–31: the configuration in use) |
| flux reading | `'F'` | log float, rate float (LE), status byte; on VME the result words are refreshed and `'K'` returned |
| other | | 0x15 |

A parameter write takes effect at the next 5 ms pass. The watchdog returns the
sequencer to scanning if a command stalls, for example when a UART argument
byte never comes.

**VME** (`vme_wb_bridge`, A16 D16, address modifiers 0x29/0x2D, base
0xC000):

* word 0: write {opcode, address}; this sets *pending*;
* word 1: write the data; read {7'b0, pending, response};
* words 2/3: log float, high then low half;
* words 4/5: rate float, high then low half.

DTACK* follows the synchronised data strobes.

## Trip, monitor, watchdogs

`trip_logic` registers the OR of the enabled conditions, selected by the
mask: FR, HP, HR and the two external reactor variables.

`monitor` converts the two floats to 12-bit codes. It shifts them as 16-bit
frames, MSB first, to two serial DACs. Each DAC has its own chip select, and
SCLK is clk/4.

Both sequencers have a `watchdog`. The signal processor's timeout is four
poll periods; the communication processor's is 2^20 clocks.

## Where this departs from the original system, and what it assumes

* The original runs both sections as software on two small processors. Here
  each section is a hard-wired finite-state machine that performs the same
  flow (poll, switch, log, filter, rate, compare, publish; scan, execute,
  refresh).
* Both sections use one clock; `syscon` synchronises the reset on each side.
  The bridge RAM has separate clock pins for each port.
* In the overlap region, the original makes the choice depend on the sign of
  the flux change. Holding the last choice (hysteresis) gives the same result
  for a monotonic change. There is no blending of the two channels.
* The window control algorithm (smallest window that reaches a target count)
  is this design's choice. So are the filter type, the rate definition, the
  log method, the Q16.16 internal format and float truncation.
* The choices made here rather than taken from the original include:
  * all addresses, the configuration layout, the command bytes and the VME
    mailbox;
  * the DAC scaling;
  * the ADC handshake;
  * the watchdog timeouts;
  * the trip mask and the threshold defaults.
* 1/256 s is used as the counting period; the original also describes it as
  "4 ms". Polling is every 5 ms, so each poll sees a completed period.
* Not built:
  * the analog board (HV supply, amplifiers, band-pass filter, variable-gain
    amplifier), the ADC, the DACs and the discriminator;
  * the single-board computer, the I/O and MIL-STD-1553 boards;
  * the final actuation logic (voting of three redundant units);
  * the radiation-hardened TMR flip-flops of the antifuse FPGAs.

  Their signals are ports of `dsp_soc`.

## Files

The `rtl/` files are:

* `wrnd_pkg.sv`: bus types, register map, configuration defaults.
* `dsp_soc.sv`: the top.
* One file per block: `syscon`, `wb_intercon`, `watchdog`, `pulse_channel`,
  `campbell_channel`, `channel_switch`, `log10_unit`, `lowpass_filter`,
  `rate_filter`, `fix2float`, `signal_processor`, `trip_logic`, `wb_dpram`,
  `ww_bridge`, `uart`, `vme_wb_bridge`, `monitor`, `comm_processor`.

Each file opens with a description of its interface and timing.

`tb/` has one self-checking testbench per block (`tb_<block>.sv`, with the
bus BFM in `tb_wb_master.sv`) and two system tests:

* `tb_dsp_soc` runs at shortened periods (4000-clock poll, 3000-clock
  counting period, 16-period history, 32 Campbell samples, fast UART). It
  takes the flux from low through the overlap to high and back. It checks
  the log flux against the value expected from the stimulus, channel
  switching with hysteresis, one- and multi-period windows, HP, HR and
  reactor-variable trips, the trip mask, UART W/R/F commands, a VME flux
  reading, DAC frames and watchdog recovery. It prints how often each
  occurred.
* `tb_dsp_soc_range` sweeps one flux value over four decades, up and back
  down, and drives both detector models from it. The pulse rate is f per
  counting period, limited by pile-up. The Campbell mean square is K·f.
  With the Campbell offset set to −log10 K over the serial link, the log
  output follows log10 f within about 0.04 decade through both channels. At
  high flux the piled-up pulse count would read far too low, which is why the
  switch is driven by the Campbell value. The channel changes at the upper
  level on the way up and at the lower level on the way down.
* `tb_dsp_soc_full` uses every default (5 ms, 1/256 s, 256 periods, 1024
  samples, 115 200 baud, about 1.1 M clocks). It checks both channels'
  flux readings over the serial link and the switch between them.

Every testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dsp_soc \
    -y rtl -y tb +libext+.sv -Irtl rtl/wrnd_pkg.sv tb/tb_dsp_soc.sv
./obj_dir/Vtb_dsp_soc
```

Replace `tb_dsp_soc` with any other testbench name. The simulator is
two-state, so all state that is read is reset. The bridge RAMs are
initialised to zero. The reduced system test runs in a few seconds, and the
full-size one in about ten.
