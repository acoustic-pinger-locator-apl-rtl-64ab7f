# Acoustic pinger locator: FPGA sampling, conditioning control and ping detection

An underwater vehicle has to find an acoustic pinger: a beacon that sends a
short tone burst at a fixed frequency (tens of kHz) every two seconds. The
vehicle carries up to five hydrophones. Each hydrophone signal goes through
an analog board that amplifies it twice with variable-gain amplifiers, band-pass
filters it in a programmable switched-capacitor filter, and shifts it into
the 0 to 3.3 V range of a 12-bit converter. An FPGA samples all five channels
at once, works out when a real ping starts on each channel, and reports to the
host computer over RS-232.

This RTL is the FPGA side of that system. It does five things:

1. It keeps the analog board tuned. The gain, the DC level shift and the
   filter centre frequency are all set from the FPGA. Gain and level shift go
   through DS1803 digital potentiometers on I2C. The filter is a MAX268, set
   through control pins and a clock.
2. It samples the five channels at the same instant and measures the sample rate.
3. It detects the leading edge of each ping on each channel, and rejects
   echoes and noise spikes.
4. It keeps the gain of all channels equal. The timing comparison between
   hydrophones needs every channel to have the same phase shift.
5. It exchanges command and status packets with the host.

The localization maths is not part of this RTL. That step would turn the
arrival differences between hydrophones into heading, depth and distance,
by FFT phase comparison, multilateration or a fitted mapping. See
[What is not here](#what-is-not-here).

## Structure

```
                 +-------------------------------- apl_top ---------------------------------+
 converters ---> | analog_sample --samples/sync--> apl_channel x5 ---ping x5----> mcu_packet | <--> UART
 (3 x dual)      |        |                        |  dc_calc                       ^        |
                 |        +--> sample_freq --------|--peak_to_peak --max/min-> arbiter|        |
                 |                                 |  ping_detect            (common gain)     |
                 |                                 |  adder_ctrl --offset wiper--+  |          |
                 |                                 |                             v  v          |
                 |                                 +------------------------> dpot_ctrl ------ | ---> I2C master
                 |                                                            (ds1803_if)      |
                 |                 freq/Q from host --> max268_if (square_wave) -------------- | ---> MAX268 F, Q, CLK
                 +---------------------------------------------------------------------------+
```

| module | role |
|---|---|
| `apl_pkg` | shared constants, sample and wiper types, I2C command struct, packet codes |
| `analog_sample` | one start pulse to all converters; a sync strobe once every converter has finished |
| `sample_freq` | sample period in clock cycles; samples per second |
| `apl_channel` | structure only: `dc_calc`, `peak_to_peak`, `ping_detect`, `adder_ctrl` for one channel |
| `dc_calc` | DC level by exponential averaging |
| `peak_to_peak` | max and min of the current gain window |
| `ping_detect` | silence-then-edge ping rule |
| `adder_ctrl` | level-shift loop: steers the channel's DC level to mid-scale |
| `arbiter` | one common gain for all channels, from the loudest channel's span |
| `dpot_ctrl` | writes all eight DS1803 chips, one I2C message after another, at a fixed interval |
| `ds1803_if` | one DS1803 write-both-wipers message as four I2C byte commands |
| `max268_if` | frequency table to MAX268 F pins and clock; Q pins |
| `square_wave` | 50 % duty clock of programmable half period |
| `mcu_packet` | host packets over the UART byte interface |

All modules use one clock and a synchronous, active-high reset.

## Sampling

There are three converter modules, each with two 12-bit inputs, giving six
inputs for five channels. Channel *c* is input *c mod 2* of converter *c / 2*.
`analog_sample` starts all three with one pulse. It records each converter's
one-cycle `done` pulse. Once all three have answered, it copies the five
results and raises `sample_valid` for one cycle. It then starts the next
conversion in the following cycle.

The sample rate therefore depends only on how fast the converters are.
`sample_freq` measures it in two ways:

* `period`: clock cycles between the last two strobes.
* `freq`: strobes counted in a window of `RATE_WINDOW` cycles. The default
  window is one second of the 50 MHz clock, so `freq` is in samples per
  second and no divider is needed.

In the full-rate simulation the converter model takes 46 to 50 cycles, which
gives a sample every 48 to 52 cycles, close to the converters' rated 1 MS/s.

## Ping detection

An echo of the previous ping, or a burst of noise, looks much like a ping.
Two facts tell them apart: a real ping follows a long silence, and its
leading edge stands well clear of the DC level. `ping_detect` has two states.

* **Silence.** A counter counts clock cycles. Any sample more than
  `SILENCE_THRESH` (64 codes) from the channel's DC level resets it. When the
  counter reaches `SILENCE_CYCLES` (0.5 s), the detector is armed.
* **Armed.** The first sample more than `PING_THRESH` (256 codes) from the DC
  level is the leading edge. `ping` pulses for one cycle and the detector goes
  back to Silence.

An echo arrives within a fraction of a second of its ping. By then the
detector has not been silent long enough to re-arm, so the echo is ignored.
A sample between the two thresholds neither arms nor fires.

The DC level is the slowly moving centre of the signal. `dc_calc` computes
it with `acc += x - acc/2^K` (K = 8). Its time constant is about 256 samples,
roughly 0.25 ms at 1 MS/s. That is short against the 0.5 s silence and long
against a 25 kHz tone.

Each channel detects independently. The host gets a status packet naming the
channels that fired since the last report. The arrival times themselves are
not sent: see below.

## The control loops through the potentiometers

Two feedback loops close through the analog board. Both take effect only when
the next potentiometer refresh writes the new wiper code.

**Level shift (per channel).** An op-amp adder on the board adds a wiper
voltage (about 1.65 V) to the signal. Every `ADDER_CYCLES` (0.5 s),
`adder_ctrl` corrects the wiper:

    pot <= clamp(pot - (dc - 2048) / 16, 0, 255)

The factor of 16 is 4096 converter codes over 256 wiper steps, for the same
0 to 3.3 V range and a unity-gain adder. The loop is a pure integrator with a
gain of about one per update. The wiper is refreshed within one
`DPOT_CYCLES` interval (0.5 s), and the DC filter settles well within that.
The next correction therefore sees the effect of the last one. If the adder
gain on the board is not one, the loop still converges as long as the
effective gain stays below two.

**Common gain (all channels).** The phase shift of a variable-gain
amplifier depends on its gain. If channels had different gains, the timing
between hydrophones would be biased. So there is one gain for all channels.
Every `ARB_CYCLES` (2.5 s, longer than the 2 s ping period, so that every
window holds a ping), `arbiter` does three things:

* It takes the largest `max - min` span of any channel. The loudest channel
  decides, so that no channel clips.
* If the span is above 3584, it lowers the gain index by 4. If the span is
  below 1536, it raises the index by 4. The index runs from 0 to 510.
* It clears the peak windows.

The index fills the pre-amplifier wiper first (0 to 255), then the
post-amplifier wiper. The same two codes go to every channel.

**Wiper map.** The DS1803 has three address pins, so one I2C bus holds eight
chips, or sixteen wipers. Each channel uses three wipers:

| wiper | chip / wiper | use |
|---|---|---|
| 3c | (3c)/2, (3c)%2 | pre-amplifier gain, channel c |
| 3c+1 | (3c+1)/2, (3c+1)%2 | post-amplifier gain, channel c |
| 3c+2 | (3c+2)/2, (3c+2)%2 | level shift, channel c |
| 15 | 7 / 1 | spare, written 0 |

**Refresh.** Every `DPOT_CYCLES` (0.5 s), `dpot_ctrl` takes a snapshot of
all sixteen codes. It then writes chip 0 to chip 7 in turn, one I2C message
at a time. `ds1803_if` sends each message as four byte commands to an I2C
master:

    START 0101 A2 A1 A0 0 | 0xAF (write both) | wiper 0 | wiper 1 STOP

If a byte is not acknowledged, the message is abandoned and a stop-only
command frees the bus. `i2c_nack_seen` is then set and stays set until
reset. The other chips are still written.

## Filter programming

The MAX268 centre frequency is tied to its clock,
`fCLK / f0 = pi (N + 13)`, where N (0 to 31) is on pins F0 to F4. Its Q is
`64 / (128 - N)`, where N (0 to 127) is on pins Q0 to Q6. The host selects
a table index, and `max268_if` looks up N and the half period H of the
filter clock: `fCLK = 50 MHz / 2H`. The table is computed during
elaboration. For each f0 it tries all 32 values of N and keeps the one whose
rounded H comes closest:

    H = round(CLK_HZ * 113 / (710 * (N + 13) * f0))        (pi ~ 355/113)

Entry i is `f0 = 20 kHz + i * 1 kHz`, for i = 0 to 20. Indexes above 20
select entry 20. At 50 MHz this gives:

| f0 (kHz) | N | H | f0 obtained (Hz) |
|---|---|---|---|
| 20 | 8 | 19 | 19944 |
| 22 | 6 | 19 | 22044 |
| 25 | 16 | 11 | 24946 |
| 27 | 29 | 7 | 27067 |
| 30 | 25 | 7 | 29916 |
| 35 | 25 | 6 | 34902 |
| 40 | 20 | 6 | 40191 |

Every entry is within 0.5 % of its target. The Q code comes from the host
and goes straight to the Q pins (reset value 96, which is Q = 2). Both
filter sections are in series at the same centre frequency, so the same clock
drives CLKA and CLKB. The pins need level translators to reach the filter's
±5 V logic.

## Host packets

The UART sits outside the design and is reached through a byte handshake:

* Receive: `rx_rda` means a byte is waiting, and a one-cycle `rx_rd` takes it.
* Transmit: while `tx_tbe` is high, a one-cycle `tx_wr` hands over `tx_data`.

The UART must drop `rx_rda` or `tx_tbe` within one cycle of the strobe.

| direction | bytes |
|---|---|
| host to FPGA | `A5 cmd arg chk`, with chk = A5 ^ cmd ^ arg. `01` sets the filter table index, `02` sets the Q code, `03` requests status |
| FPGA to host | `A5 81 mask per_hi per_lo rate[23:16] rate[15:8] rate[7:0] gain_hi gain_lo chk`, with chk = XOR of the first ten bytes |

A packet with a wrong checksum or an unknown command is dropped and counted
in `bad_packets`. The FPGA sends a status packet when the host asks for one,
and also by itself as soon as any channel detects a ping. `mask` lists the
channels that fired since the last status packet.

This framing is this design's own. The original system used the packet
format of a robotics-club library that is not reproduced here. Replace
`mcu_packet` to talk to that library.

## External cores at the top's ports

Three cores are not part of this RTL. The top connects to each of them
through its word-level or byte-level interface.

* **Converter serial interface**, one per dual converter. It takes
  `adc_start` (one cycle, shared) and returns a one-cycle `adc_done[i]`,
  with `adc_data[i][0..1]` valid in that cycle.
* **I2C master.** It takes `i2c_req` together with `i2c_cmd` = {sta, sto, wr,
  byte[7:0]}. Both stay steady until the master answers with a one-cycle
  `i2c_done`, and `i2c_nack` is valid in that same cycle. An assertion in
  `ds1803_if` checks that the command stays steady.
* **UART**, as above.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | clock frequency, used for the filter table |
| `RATE_WINDOW` | `CLK_HZ` | window for the samples-per-second count |
| `DC_K` | 8 | DC filter time constant, 2^K samples |
| `SILENCE_CYCLES` | 25 000 000 | silence needed before a ping is accepted (0.5 s) |
| `SILENCE_THRESH`, `PING_THRESH` | 64, 256 | distance from DC level, in codes, for silence and for an edge |
| `ADDER_CYCLES` | 25 000 000 | level-shift update interval (0.5 s) |
| `ARB_CYCLES` | 125 000 000 | gain window (2.5 s) |
| `DPOT_CYCLES` | 25 000 000 | potentiometer refresh interval (0.5 s) |

The following come from the original design:

* the 50 MHz clock;
* five channels on three dual 12-bit converters;
* eight DS1803 chips on one bus;
* level-shift updates about twice a second, towards 1.65 V;
* the two MAX268 equations and the pin names;
* the silence-then-edge ping rule.

All other numbers are choices of this design. They are marked as such in each
file's header.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. The behavioural
models the benches share are in `tb/`:

* `adc_array_model`: hydrophones, analog board and converters, including
  the gain and level-shift response to the wiper codes;
* `i2c_byte_model`: the I2C master;
* `uart_byte_model`: the UART.

The simulator is Verilator 5:

```
verilator --binary --timing --assert --top-module tb_apl_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/apl_pkg.sv tb/tb_apl_top.sv
./obj_dir/Vtb_apl_top
```

Change `tb_apl_top` to any other bench's name to run that bench.

* **`tb_apl_top`** runs the whole design in closed loop for about 250 000
  cycles. It shortens the intervals to 1000 to 5000 cycles and repeats a ping
  every 2500 cycles, with a delay between channels and a half-amplitude
  echo. Halfway through, the pinger "comes closer" and the signal grows. The
  bench decodes the I2C traffic back into wiper codes and feeds them to the
  analog model. It counts each mechanism and fails if any never happens:
  sampling, arming, ping, rejected loud echo, level-shift update, gain up,
  gain down, potentiometer round, refused I2C byte, filter and Q change, bad
  packet, status on request, status on ping. It also checks that every
  channel settles within 40 codes of mid-scale, and that every I2C message
  and status packet is well formed.
* **`tb_apl_top_full`** leaves every parameter at its default and runs
  3.126 s of time, 156.3 M cycles, which takes about 90 s. Wiper codes are
  decoded from the I2C traffic, so both loops run closed. Channel 2 starts
  on centre and arms 0.5 s after reset. The first level-shift update moves
  each other wiper by the expected amount. That step restarts those
  channels' silence timers, so they arm about 0.5 s later. A 25 kHz ping
  arrives at 1.12 s and 3.12 s. Each is detected once on every channel;
  its echo 20 ms later is not. Status packets naming all five channels go
  out for each burst. The sample rate over one second matches the sample
  spacing, about 958 k samples/s. Six potentiometer rounds of eight
  messages go out. At 2.5 s the gain window, whose largest span was below
  the low mark, raises the common gain by one step, and the next round
  writes it to the chips.

Every block bench has also been run against a deliberately broken copy of
its module, and each one failed there.

## What is not here

* **Arrival time and localization.** The intended method takes an FFT of
  each channel and compares the phases at the pinger frequency. The
  differences then go to multilateration, or to a fitted mapping, which gives
  heading, depth and distance. The design description states this as the
  goal. It gives no transform size, number format or bin selection, and it
  reports multilateration as numerically unstable and the mapping as still
  under test. None of it is implemented. The ping detectors give the point
  where such an analysis would start.
* **Vendor cores.** The converter serial interface, the I2C master and the
  UART are separate cores. Their interfaces are described above.
* **Analog parts.** The hydrophones, amplifiers, filters, level translators
  and power supply are board components, not logic.
* **Host packet format.** As noted above, the framing is this design's own.

## Limits to keep in mind

* The thresholds, the silence length and the gain limits are placeholders.
  They need tuning on real signals.
* If the pinger period exceeds the gain window, some windows hold no ping.
  The gain then creeps upward during those windows.
* The level-shift loop assumes one wiper step is 16 converter codes. A
  different adder gain changes the loop gain.
* A status packet reports which channels fired, but not when. Adding
  timestamps would need a free-running counter, sampled by each `ping`
  pulse.
* A level-shift or gain step larger than the silence threshold restarts the
  silence timer. After power-up, a channel that starts far off centre misses
  pings for about 0.5 s after its first correction.
* Sample-rate measurement uses the clock as its time base, so it is only as
  accurate as the 50 MHz oscillator.
