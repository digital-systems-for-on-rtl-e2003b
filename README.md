# Unattended water-quality monitor — field unit logic

This is synthesizable SystemVerilog for the digital part of an unattended station that
collects water-quality data. The station logs up to eight transducer voltages (dissolved
oxygen, temperature, pH, conductivity and so on) onto an endless-loop audio tape cartridge.
It plays the tape back over a telephone line when a central station asks for it.

The design's main idea is that **one binary counter runs everything**. A crystal time base
drives a 16-stage counter. Each command the unit needs is a bit pattern on that counter:
select an analog channel, start a conversion, shift out a bit, start the tape motor,
engage the clutch. Every 15 minutes the counter reaches the pattern that records one
*sweep*. A sweep holds eight readings, each followed by the time of day, as
frequency-shift-keyed audio: 2.3 kHz for a 1 and 2.0 kHz for a 0. A sweep is 256 counts
and lasts 3.516 s.

The logic was originally built from small-scale DTL gates and ripple flip-flops. Here it is
one synchronous design on the 149.131 kHz time-base clock. Each ripple stage becomes a
register stage enabled by the clock.

## The counter and what it means

`control_counter` advances once every 2048 clocks (one *count*, 13.7 ms, 72.8 counts/s).
Its bits have names:

| bits | names | role |
|---|---|---|
| 2:0 | S0 S1 S2 | bit select of the 8-input digital multiplexers |
| 3 | E1 | enables the first data multiplexer (data bits 0–7) |
| 4 | E2 | enables the second data multiplexer (data bits 8–15) |
| 7:5 | A0 A1 A2 | analog channel select (0 selects input 1) |
| 11:8 | X1..X4 | recorder timing (one count per sweep) |
| 15:12 | Y1..Y4 | recorder timing |

**One channel slot is 32 counts.** The analog channel stays switched on for the whole slot.

| count in slot | E2 E1 | serial line carries | other event |
|---|---|---|---|
| 0–7 | 0 0 | time-of-day bits 0–7 | count 4: A-D conversion command |
| 8–15 | 0 1 | data bits 0–7 | |
| 16–23 | 1 0 | data bits 8–15 | |
| 24–31 | 1 1 | time-of-day bits 8–15 | |

The conversion starts four counts after the channel is switched. This lets switching
transients settle. The result is latched about 20 ms later, well before count 8, when
serialisation begins. An assertion in `monitor_top` checks this.

The time-of-day word goes out whenever E1 equals E2 (`tod_select`, an exclusive-NOR).
Which time-of-day multiplexer sends in which half was not specified by the source
material. This design sends the low byte in counts 0–7 and the high byte in counts 24–31.

**Eight slots make a sweep (256 counts, 3.516 s). 256 sweeps make the 15-minute period.**
The upper byte X/Y counts sweeps. `record_control` decodes it as follows:

* The motor runs during upper counts 4–7. It starts two sweeps early so the tape is up to speed.
* The clutch is engaged during upper count 6 only. The tape moves for exactly that one
  sweep, so it is recorded. No other sweep is.
* Both are gated by `record_enable`, which the playback logic pulls low during a playback.
  A recording that falls due during a playback is therefore skipped.

When the counter rolls over, the 16-bit time-of-day counter (`tod_generator`) advances.
Its least significant bit therefore counts 15-minute periods. Bit 15 first sets after
8192 hours.

### Why 2048 clocks per count

149.131 kHz × 900 s = 2^27 clocks. A 16-stage counter that advances every 2^11 clocks
therefore wraps in exactly 15 minutes. At that rate a 256-count sweep lasts exactly
3.516 s, and bit S0 is a 36.41 Hz square wave (the
"highest frequency used by the control logic"). These are the figures the original design quotes.

The original also describes the prescaler as three divide-by-16 stages, which would be 4096.
That value doubles every time above. This design takes 2048 (`PRESCALE_DIV`). If you want
the other reading, change that one parameter.

## The data word

| bits | content |
|---|---|
| 3:0 | units digit (BCD) |
| 7:4 | tens digit |
| 11:8 | hundreds digit |
| 12 | overrange: the "1" of a 3½-digit reading |
| 14:13 | spares (brought out as `spare_bits`) |
| 15 | odd parity |

Bits are sent least significant first. `parity_tree` is a four-level tree of 15 two-input
XORs with 16 inputs. Its spare input is tied to 1, so the parity bit makes the number of
ones in the word odd. An all-zero reading therefore still contains a 1 and cannot be
mistaken for silence.

## The A-D converter

The converter was a purchased 3½-digit panel meter (1.500 V full scale) that uses dual-slope
integration. `dpm_converter` implements its digital section:

1. On the rising edge of the conversion command, the integrator clamp opens and the input
   is integrated while three cascaded BCD decade counters count 1000 counts (t1).
2. The carry out of 999 ends t1. The counters restart from 000 while a reference of
   opposite sign discharges the integrator (t2).
3. When the comparator reports the integrator back at zero, the count is latched with the
   overrange digit. If the comparator never trips, the count stops at 1999.

The analog side is `dpm_integrator`, a behavioural model on integer codes. All analog
voltages in this design are unsigned 15-bit codes of 0.1 mV. The integrator adds the input
code on each count of t1 and subtracts `DPM_VREF` = 10000 (1.0000 V) on each count of t2.
The reading is therefore the input in millivolts, rounded up, with 1 mV resolution (0.1 %
of 1 V).

The meter counts on the time-base clock (its count enable is tied high), so a conversion
takes at most 3000 clocks (20 ms). The original meter used a 10 kHz counting clock and is
quoted at 16⅔ ms per conversion. Those two figures do not agree, and at 10 kHz a conversion
could not finish in the 55 ms window before serialisation.

`analog_mux_3705` is a behavioural model of the 8-channel MOS switch on the same codes. Its
output enable is tied high. Nothing in the source material says what drives it.

## Serialisation and keying

There are four 8-input multiplexers (`mux8_9312`). Their select inputs are S2..S0. A
disabled multiplexer outputs 0:

* two multiplexers carry the data word, enabled by E1 and E2
* two carry the time-of-day word, enabled by E1 = E2 = 0 and E1 = E2 = 1

`fsk_keyer` picks the time lines when `tod_select` is 1 and the data lines otherwise. It
then gates `tone_hi` (2.3 kHz) for a 1 or `tone_lo` (2.0 kHz) for a 0 onto `tone_out`. The
tones come from two free-running oscillators outside this logic.

## Playback

`playback_control` is two toggle flip-flops.

* **Playback command.** A switch closure (`playback_cmd_n` low) clears both flip-flops.
  With flip-flop 2 clear, the recorder is in play mode: motor on, clutch engaged, and
  recording disabled. With flip-flop 1 clear, the audio is muted.
* **First cue.** The cue marker on the tape's control track toggles flip-flop 1, and the
  audio turns on.
* **Second cue.** After one full loop the cue toggles flip-flop 1 again. Its falling
  output toggles flip-flop 2, which stops the tape and returns the unit to record mode.

The recorder's motor and clutch outputs are the OR of the record-mode and playback requests.
Both control inputs pass through `deglitch`: a two-flop synchroniser plus a filter that
accepts a new level only after 16 equal samples. It stands in for the original RC and
transistor noise-suppression networks.

After reset the unit is in record mode with the audio off. The power-up state was not
specified.

## Module map

```
monitor_top
├── control_logic
│   ├── time_base_prescaler      ÷2048 count enable
│   ├── control_counter          16-stage counter, 15-minute wrap
│   ├── conv_cmd_detect          E2 E1 S2 S1 S0 = 0 0 1 0 0
│   ├── tod_select               E1 XNOR E2
│   └── record_control           motor counts 4-7, clutch count 6
├── tod_generator                16-bit time of day
├── analog_mux_3705              (behavioural, analog)
├── dpm_integrator               (behavioural, analog)
├── dpm_converter                dual-slope sequencing, BCD counters
├── parity_tree                  odd parity
├── mux8_9312 ×4                 data and time-of-day serialisers
├── fsk_keyer
└── playback_control
    └── deglitch ×2
```

`wqm_pkg` holds the word layout (`data_word_t`), the counter bit positions and the
default prescale ratio.

## Top-level ports

| port | dir | meaning |
|---|---|---|
| `clk` | in | 149.131 kHz time base |
| `rst_n` | in | synchronous reset, active low |
| `ain[8]` | in | analog inputs 1–8, 15-bit codes of 0.1 mV |
| `spare_bits[1:0]` | in | the two spare bits of the data word |
| `tone_lo`, `tone_hi` | in | 2.0 kHz and 2.3 kHz square waves |
| `cue_in` | in | cue detector of the recorder control track (asynchronous) |
| `playback_cmd_n` | in | playback command, active low (asynchronous) |
| `tone_out` | out | FSK audio to the recorder input |
| `motor_on`, `clutch_on` | out | recorder motor and clutch (to relay drivers) |
| `mode_record` | out | recorder electronics: 1 record, 0 play |
| `audio_on` | out | recorder audio output enable |
| `ctrl_count`, `ctrl_tick`, `tod`, `convert`, `conv_done`, `tod_select_o`, `serial_bit`, `data_word` | out | internal state, for observation |

Parameters of `monitor_top`:

| parameter | default | meaning |
|---|---|---|
| `PRESCALE_DIV` | 2048 | clocks per count; must be a power of two |
| `AIN_W` | 15 | width of the voltage codes |
| `DPM_VREF` | 10000 | reference voltage code |
| `DEGLITCH` | 16 | filter length of the control inputs, in clocks |
| `INTERVAL_SHIFT` | 0 | recording interval = 15 min × 2^`INTERVAL_SHIFT`, from −5 to 16 |

### Changing the recording interval

The original changed the interval by moving one connection in the command wiring.
`INTERVAL_SHIFT` does the same job.

* **Positive value:** adds that many divider stages after the control counter. The recorder
  runs only while all of them are 0. A value of 2 records hourly, which puts 40 days
  (960 sweeps, 3375 s) on a one-hour loop.
* **Negative value:** leaves the top bits of the counter out of the recorder pattern. The
  motor-and-clutch pattern then recurs two, four, ... times per counter cycle. A value of
  −1 records every 7.5 minutes.

The channel schedule and the time-of-day step of 15 minutes do not change.

## Not included

These parts of the station are not logic. Each connects to this design through the ports
named here:

* **Crystal oscillator:** drives `clk`.
* **Tone oscillators:** unijunction oscillators that drive `tone_lo` and `tone_hi`.
* **Cartridge recorder:** a purchased unit. It receives `tone_out`, `motor_on`,
  `clutch_on`, `mode_record` and `audio_on`, and supplies `cue_in`.
* **Relay driver stages and power supplies:** analog circuits on the motor, clutch and
  supply lines.
* **Central-station equipment:**
  * the FSK-to-logic converter, built from LC filters
  * the resonant-reed tone encoder and decoder, which would raise `playback_cmd_n`

The central station is described only as analog circuits.

Other gaps:

* The recorder's erase-oscillator and tone-marker controls are not driven. Writing the cue
  marker is not described.
* Setting the time-of-day clock is not described. It starts at 0 after reset.

## Where the source disagrees with itself, and what was chosen

* **Count rate:** 2048 clocks per count, not 4096; see "Why 2048 clocks per count".
* **Clutch timing:** the clutch is engaged during upper count 6. The timing table puts the
  clutch label at count 8, but the text records during "the 6th count" and stops the motor
  after count 7. The clutch gate also takes the motor signal as an input.
* **Tone assignment:** 2.3 kHz means 1. The keyer schematic appears to route the 2.0 kHz
  tone to the gate enabled by a 1; the text states 2.3 kHz for a 1 twice.
* **Group duration:** one passage gives about 2 s per group of readings. The timing section
  gives 3.516 s, which this design follows.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wqm_pkg.sv tb/tb_parity_tree.sv \
          --top-module tb_parity_tree -Mdir obj_parity -o sim
./obj_parity/sim
```

Other files are found through `-Irtl -Itb`, because each file holds one module named after it.

`tb/tb_monitor_top.sv` is the end-to-end test. It runs at the default parameters and takes
about a minute. It simulates two 15-minute periods (about 270 million clocks) with
`tb/tape_model.sv`. That model is a loop of tape samples with a cue marker at position 0,
and the tape coasts briefly after the motor stops.

**Period 0**

* The recorded sweep is checked bit by bit, both on the serial line and after demodulating
  the tone. The expected values come from the input voltages: BCD digits, overrange, odd
  parity and time of day.
* A playback follows. Every bit played back is compared with the bit recorded at the same
  tape position.

**Period 1**

* New inputs and spare bits are checked on the serial line in every sweep.
* A playback commanded just before the recording is due must skip it: nothing is written
  to the tape.

**Timing and coverage checks**

* The clutch is engaged for 256 × 2048 clocks.
* The time of day advances after exactly 2^27 clocks.
* Each mechanism must occur at least once: conversions, time-of-day transfers, data
  commutations, overrange readings, record windows, skipped recordings, playbacks and
  time-of-day advances.

The unit testbenches each cover one block:

* **Exhaustive:** decoders, parity tree and keyer.
* **Two full 65536-count cycles:** the control logic, with a 4-clock prescaler. This
  includes the hourly and 7.5-minute interval settings.
* **Panel-meter converter:** the testbench plays the comparator, checking the 1000-count
  t1, the t2 length, the BCD value and overrange, and the 1999 over-scale stop.
* **Playback logic:** bounce rejection, cue glitch rejection, the two-cue sequence and
  recording lockout.

## How far to trust it

* **Taken directly from the original logic:** the counter patterns, the truth tables of
  the multiplexers and the exclusive-OR gates, the word format, odd parity, and the
  playback flip-flop structure.
* **This design's own choices:**
  * the synchronous single-clock form
  * the reset state
  * the input filters
  * the time-of-day multiplexer enables
  * the voltage codes and the integrator model
  * the panel meter's counting rate

All modules pass Verilator lint and elaborate in Yosys (slang front end). No latches or
combinational loops are reported.
