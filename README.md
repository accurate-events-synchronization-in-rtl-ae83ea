# GNSS receiver with sample-exact event timing

A GNSS receiver measures time. A pseudo-range is the difference between the receive time and
the satellite's transmit time, and one chip of GPS L1 C/A code is about 300 m. So every
channel's state must be read at *the same* receive instant, and that instant must be known
exactly. This design makes that instant a sample. One free-running counter, N_s, counts the
front-end samples, and the receiver's whole notion of time comes from it:

    t_rx = t_0 + N_s / F_s

Everything that has to happen "at a time" is instead arranged to happen *at a sample index*.
This covers starting a tracking channel at the first sample of a PRN code period, and
freezing all channels for a measurement. Processing delays then do not matter:

- how long an acquisition took,
- how long the channel-start arithmetic took,
- how long a host needed to answer.

They never enter a measurement. They only need to be short enough that the target sample
has not yet passed.

This RTL holds the programmable-logic part of such a receiver for GPS L1 C/A:

- sample distribution,
- one shared acquisition engine,
- a channel manager,
- six autonomous tracking channels.

Each tracking channel is a cascade of four stages, linked by events. Only the first stage
runs at the sample rate. The loop filters and the channel manager are built as logic, so
the channels acquire, start and track with no processor. The host only supplies
measurement times, and optionally channel starts, and collects the measurement records.

```
 front end ──► data_iq_handler ──(sample bus: I, Q, index N_s, Do_Measurement)──┬──► acquisition
   (ports)       sample counter                                                 │        │ result
                 measurement target                                             │        ▼
                                                                                │  channel_manager
                                                                                │        │ {PRN, Doppler, N_init}
                                                                                ▼        ▼
                                                       tracking_channel x NCH (nco_correlator ► integrator_synchronizer
                                                                               ► loop_estimator / data_decoder)
                                                                                │
                                                         measurement records ◄──┘ (ports, to measurement/navigation software)
```

Defaults:

- F_s = 4 MHz, so one code period is 4000 samples.
- 8-bit I/Q samples.
- 6 channels.
- An 8.192 ms acquisition record (32768 samples).
- 300-bit navigation frames.

## The sample bus and the measurement event (`data_iq_handler`)

Each front-end sample (`fe_valid`, `fe_i`, `fe_q`) is registered once. It is then
broadcast with its index, `s_index` = the value of the 48-bit counter N_s when the sample
arrived. The index is what every other block uses as time. With 48 bits the counter wraps
after 2.2 years at 4 MHz.

The host asks for a measurement by writing a target index: `meas_arm` with `meas_ns`. When
the sample whose index equals the target goes out on the bus, it carries `s_do_meas = 1`.
This is the Do_Measurement flag, and every channel sees it on the same sample. A target
that is already in the past when it is written, or that a sample skips over, is reported
on `meas_missed` and dropped. `meas_armed` shows a pending target.

There is no buffer between the front end and the channels. A channel must accept one
sample per `fe_valid`, and the design does that at up to one sample per clock.

## The tracking channel: a cascade of events

A channel (`tracking_channel`) is four blocks. Each one is woken by an event from the one
before it:

| stage | runs | keeps | raises |
|---|---|---|---|
| `nco_correlator` | every sample | carrier and code phase (NCOs), E/P/L correlators | End of Code (EoC) at the sample that completes 1023 chips |
| `integrator_synchronizer` | at each EoC | N_c (codes in the current bit), bit-edge histogram | End of Integration (EoI), End of Bit (EoB), `ds_done` |
| `loop_estimator` | at each EoI | Costas PLL and carrier-aided DLL | new NCO words (`cmd_valid`) |
| `data_decoder` | at each EoB | N_b (bits in frame), N_f (frame count), preamble/TOW | `bit_done`, navigation bits |

`nco_correlator` wipes off the carrier with a 16-point cos/sin table. It multiplies by the
early, prompt and late code chips, taken at ±0.5 chip from the same code phase accumulator,
and accumulates. At the sample where the code phase wraps past 1023 chips it raises EoC and
hands over the six sums. The code chips come from `ca_code_table`, which fills a 1023-bit
register from the G1/G2 generators in 1023 clocks when a channel starts.

`integrator_synchronizer` counts codes into N_c, from 0 to 19. Until the bit edge is known
it looks for sign changes of the prompt I sum between consecutive codes. It keeps a
histogram over the 20 possible edge positions. The edge is declared when one position
reaches `BS_THRESH` counts and every other position has at most half as many. From then on
N_c is counted from the edge, EoB marks each bit with its sign, and integrations (EoI) of
`INT_CODES` codes restart at the edge.

`data_decoder` shifts bits into a 300-bit window. It looks for the 8-bit preamble 10001011,
or its inverse, at a position that repeats it exactly one frame later. It then takes
N_b = 8, the bits already received in the frame. It reads the 17-bit time of week (TOW) at
frame bits 30..46, corrected by the polarity bit 29. At the next frame start it sets N_f to
that TOW. From then on the receiver knows the transmit time of any sample completely.

`loop_estimator` has two discriminators:

- the Costas discriminator Qp·sign(Ip)/|Ip|, in rad·2^12;
- the normalised early-minus-late envelope, (|E|−|L|)/(2(|E|+|L|)), in chip·2^12.

Both discriminators share one serial divider. It runs:

- a second-order PLL with Kp = 6.366 Hz/rad and Ki = 0.127 Hz/rad per 1 ms update (about
  15 Hz loop bandwidth);
- a first-order DLL, aided by the carrier (code Doppler = carrier Doppler/1540), with a
  gain of 8 chip/s per chip.

The new carrier and code words are written into the NCO about 100 clocks after the EoI.

## Keeping the counters consistent: Measurement_Enable

This is the subtle part of the design. A measurement record contains:

- the code phase φ_c (in chips) and the carrier phase, which live in `nco_correlator`;
- N_c, which lives in `integrator_synchronizer`;
- N_b and N_f, which live in `data_decoder`.

The receiver turns the record into a transmit time:

    t_sv = T_chip·φ_c + T_c·N_c + T_b·N_b + T_f·N_f
         (T_chip = 1/1.023 MHz, T_c = 1 ms, T_b = 20 ms, T_f = 6 s)

The three counters are updated *after* the EoC that changes them, one stage at a time and
some clocks later. Suppose the measurement sample is, or follows closely, the sample that
completes a code. Then the phase is already "0 chips into the next code", but N_c, and
perhaps N_b and N_f, still hold the old count. The transmit time would then be one code,
bit or frame short.

`nco_correlator` keeps a flag, Measurement_Enable, that says "the counters agree with the
phase":

1. Every EoC clears it.
2. `integrator_synchronizer` raises `ds_done` once it has updated N_c. At an End of Bit it
   first waits for `bit_done` from `data_decoder`, which has then updated N_b and N_f. The
   flag is then set again.
3. On the measurement sample (Do_Measurement) the channel latches the phases the NCOs hold
   after that sample: the code and carrier phase of sample N_meas + 1, which is the
   record's `ns_tag`. The record is sent (`meas_valid`) with the counters as soon as
   Measurement_Enable is set. That is on the next clock if the flag was already set, or at
   `ds_done` if an EoC came first.

The record therefore always pairs a phase with the counters of the same code. The wait is
a few clocks, far shorter than the 4000 samples between EoCs. An assertion in
`nco_correlator` checks that `ds_done` never arrives while the flag is already set. Another
in `integrator_synchronizer` checks that no EoC arrives while it waits for `bit_done`.

All channels latch on the same sample, so all records of one measurement carry the same
`ns_tag`, whenever they leave.

## Starting a channel at a known sample (`channel_manager`)

The acquisition records STORE_LEN samples and notes N_acqui, the index of the first one.
Its search gives the delay d: a code period of the satellite starts at sample N_acqui + d.
Code periods of the received signal repeat every

    T_c^rx = T_c / (1 + f_d / f_L1)

so the next code starts at

    N_init = N_acqui + d + k · T_c^rx · F_s

The manager picks the smallest k with N_init > N_s + TCOMP_SAMPLES. The margin
TCOMP_SAMPLES, 1 ms by default, lets the channel load its code table before that sample.
T_c^rx·F_s is computed as 1023·2^32 / code_word with an 80-bit serial divider. It is
accumulated with 32 fractional bits and rounded at the end. k is found in steps of 1024
periods and then single periods, so results many seconds old are still placed to well
under a sample.

The error of N_init comes only from the Doppler error of the acquisition. A 200 Hz error
held for 5 s moves the code start by 0.635 µs, which is less than one chip. The channel
(`nco_correlator`) waits in state WAIT for the sample whose index equals N_init, and starts
its NCOs there with phase zero. If it sees a later index first, the start is too late and
it reports `start_missed`. The host can start a channel the same way through
`host_init_valid`/`host_init`, which has priority over the manager.

The manager:

- searches the PRNs set in `prn_mask`, round robin, and skips PRNs already tracked;
- gives each detection to the lowest free channel;
- raises `mgr_no_channel` when all channels are busy;
- counts searches and detections.

## Acquisition (`acquisition`)

This is a serial search in the time domain. It correlates the record against a replica
wiped of carrier:

- over NUM_BINS = 21 Doppler bins, 500 Hz apart (±5 kHz);
- at every sample delay of one code period;
- over NCOH = 7 code periods per cell, each period summed coherently and squared, then the
  squares added.

A detection needs the best cell to be DET_RATIO = 8 times the mean of all cells. It reports:

- the delay d;
- the Doppler word of the bin;
- the peak and the total;
- N_acqui.

The search computes the same cells as an FFT-based correlation, one cell per 4000·7 clocks.
At the defaults that is 2.35·10^9 clocks per PRN. At the 4 MHz sample rate and one sample
per clock this is far slower than an FFT engine. This block is where the design is
knowingly incomplete.

## Number formats

| quantity | format |
|---|---|
| sample index N_s, N_init, `ns_tag` | 48-bit unsigned |
| carrier word (Doppler) | signed 32-bit, LSB = F_s/2^32 Hz (0.93 mHz at 4 MHz) |
| carrier phase | 32-bit fraction of a cycle, plus a signed 32-bit whole-cycle count |
| code word | chips per sample · 2^32 (nominal 1.023 MHz/F_s · 2^32) |
| code phase | 10-bit integer chip (0..1022) + 32-bit fraction |
| code Doppler | carrier word · 2788939 / 2^32 (= carrier word / 1540) |
| correlator sums | signed 32-bit |
| carrier table | 16 points, amplitude 15, index = phase rounded to 4 bits |
| N_c, N_b, N_f | 5, 9, 20 bits |

## Top level (`gnss_receiver_top`)

Inputs:

- `fe_valid`, `fe_i`, `fe_q`: the front-end samples;
- `meas_arm`, `meas_ns`: a measurement target;
- `mgr_enable`, `prn_mask[32:1]`: the automatic search;
- `host_init_valid[NCH]`, `host_init`: direct channel starts;
- `chan_stop[NCH]`.

Outputs, one per channel unless stated:

- `meas_valid`, `meas`: measurement records (`meas_t`);
- `dbit_valid`, `dbit`: navigation bits;
- `chan_busy`, `chan_tracking`, `chan_start_missed`, `chan_prn`, `chan_doppler`;
- `ev_eoc`, `ev_eoi`, `ev_eob`: the events;
- `meas_enable`;
- `integ`: the integrator outputs;
- for the acquisition and the manager: `acq_busy`, `acq_valid`, `acq_result`,
  `mgr_no_channel` and the search and detection counts;
- `n_s`.

The types are in `gnss_pkg`.

## What follows the original design and what does not

Taken from the original design:

- the sample counter as the only time base;
- Do_Measurement raised on the sample whose index is N_meas;
- channel start at N_init computed from N_acqui, the delay and the received code period,
  with a computation margin;
- the four-stage channel, driven by events, with only the NCO/correlator at sample rate;
- the counters N_c, N_b, N_f and the transmit-time sum;
- the Measurement_Enable handshake;
- the 8.192 ms acquisition record;
- six GPS channels.

This design's own choices, where the original gives no detail:

- The 4 MHz sample rate is derived from the 0.25 µs sample spacing of its timing diagram.
  It is consistent with 8.192 ms = 32768 samples.
- Word widths and number formats, the 16-point carrier table and the ±0.5 chip correlator
  spacing.
- The histogram bit synchroniser, the preamble/TOW frame synchroniser, the discriminators
  and the loop gains.
- Manager policy: round robin and the lowest free channel.
- The detection rule.

Departures:

- The loop filters and the channel manager are logic, not processor software.
- The FFT acquisition engine is replaced by a serial search: same result, far slower.
- Only GPS L1 C/A is built. Galileo E1 codes and signal structure are not included.
- Not built: carrier-to-noise estimation, navigation-message parity checks, the measurement
  and navigation software (pseudo-range, position), and the RF front end. The record
  outputs and the navigation-bit outputs are where they would connect.
- The acquisition replica ignores code Doppler over the 8 ms record. At ±5 kHz this is at
  most 0.03 chip.

## Simulating

Each testbench checks its own results and ends with a line `TB_RESULT checks=N failures=M`.
With plain Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/gnss_pkg.sv tb/tb_nco_correlator.sv \
          --top-module tb_nco_correlator
./obj_dir/Vtb_nco_correlator
```

Replace the name for the other testbenches:

- `tb_ca_code_table`: all 32 PRNs against the G2 delay list, and against the first 10
  chips in octal.
- `tb_data_iq_handler`: indices, Do_Measurement, missed targets.
- `tb_nco_correlator`: start at N_init, late start, EoC timing, correlation values, and the
  Measurement_Enable wait.
- `tb_integrator_synchronizer`: a reference model over random bit streams.
- `tb_loop_estimator`: discriminator values and the NCO words of the loop updates.
- `tb_data_decoder`: preamble, frame sync, N_b/N_f, TOW and inverted polarity.
- `tb_channel_manager`: N_init against a real-valued model, and channel allocation.
- `tb_acquisition`: detection, delay and Doppler; rejection of an absent PRN. Run at
  2.046 MHz with a 4096-sample record.
- `tb_tracking_channel`: pull-in, bit/frame sync, N_f, and transmit time within 0.1 chip.
  Run with 60-bit frames.
- `tb_gnss_receiver_top`: end to end with acquisition.
  - Setup: three satellites and one absent PRN, at 2.046 MHz, with 3 Doppler bins and
    50-bit frames.
  - Counted mechanisms: detection, rejection, manager and host starts, EoC, EoI, EoB,
    records, a record that waited for Measurement_Enable, and a missed target.
  - Each record's transmit time is checked within 0.1 chip.
- `tb_gnss_receiver_top_full`: the top with every parameter at its default.
  - Four channels are started from the host with Doppler errors of 15 to 30 Hz.
  - It tracks 13 s of 4 MHz signal (52 million samples): pull-in, bit sync, frame sync
    over 300-bit frames, and TOW.
  - Measurements are taken before and after frame sync. One of them falls on an EoC sample.
  - It runs in about 3.5 minutes.
  - The default acquisition itself (2.35·10^9 clocks per PRN) is only simulated at the
    reduced size of `tb_gnss_receiver_top`.

`tb/gps_signal_gen.sv` is the signal source shared by the larger testbenches. It gives
complex baseband with several satellites, each with:

- a PRN built independently from the G2 delays;
- a code rate with Doppler, and a Doppler carrier;
- navigation bits;
- Gaussian-like noise.

All parameters have defaults. Reduced-size runs override them on the instance, as the
testbenches above do.
