# Single-pass beam position processing in FPGA logic

A beam position monitor with four button or stripline pickups (A, B, C, D)
sees a single bunch as a very short pulse on each pickup. A narrow-band
analog front end stretches each pulse into a ringing burst of a few hundred
nanoseconds, and four fast ADCs sample it. The bunch position can be
recovered from a single pass of a single bunch by comparing the energy of
the four bursts. This RTL does all of that per-bunch arithmetic in hardware,
with a fixed latency and no processor in the loop. That makes it usable
inside fast feedback and feed-forward loops, and for a machine-protection
interlock.

For every trigger the design:

1. acquires 1024 samples of each channel into an ADC rate buffer,
2. finds the bunch in the first 150 samples,
3. measures the amplitude of each channel over a window around the bunch,
4. turns the four amplitudes into X, Y, Q and SUM,
5. updates an interlock, and
6. publishes one record, both to a host computer and as a Gigabit Ethernet
   payload.

The processing chain follows the published description of the Libera
Brilliance Single Pass FPGA processing. Number formats, handshakes, the
STATUS encoding and the scheduling are this implementation's own choices.
Each one is listed below.

## Processing of one bunch

```
 trig_in ─► trigger_delay ─┬─► adc_rate_buffer (host copy) ───────────► sbc_rd_*
                           └─► adc_rate_buffer (calculation copy)
                                    │ one shared read port
        ┌───────────────────────────┼──────────────────────────────┐
        ▼                           ▼                              ▼
 data_extraction ─► amplitude_accumulator ─► isqrt x4 ─► gain_correction
   (t0, window,                                               │
    peaks)                                                    ▼
        │                                              position_calc
        └──────────────► interlock ◄──────────── X, Y ─────┤
                            │                              ▼
 trigger_counter ──────► record (Va..Vd, SUM, Q, X, Y, STATUS, COUNTER)
                            ├──► result / result_valid (host)
                            └──► gbe_stream ──► gbe_t* (Ethernet payload)
```

`libera_sp_top` runs these stages one after another under one sequencer.
They share the calculation buffer's single read port: the extractor reads
it first, then the accumulator, then the Ethernet payload former. Everything
runs in one clock domain, the ADC sample clock, at one sample per channel per
clock. A trigger that arrives while a bunch is still being processed is
ignored and reported in STATUS. This covers a trigger whose delay has not yet
run out, and one whose delayed trigger finds the sequencer busy. The
original system limits the bunch rate to 200 Hz. One bunch takes about 1.3k
clocks here, so that limit leaves a large margin.

### Trigger delay and acquisition

`trigger_delay` delays the external trigger by `trig_delay` clocks. The
delay places the bunch at a useful position in the buffer. The delayed
trigger starts both `adc_rate_buffer` instances. Each one writes the next
1024 samples of all four channels, side by side, into one memory word per
clock. The host copy is readable at any time through `sbc_rd_addr` and
`sbc_rd_data`. The calculation copy feeds the rest of the chain.

### Finding the bunch: threshold, pretrigger, posttrigger

`data_extraction` reads the first 150 samples. A sample counts as signal
when its magnitude is above `threshold`. The sign is ignored because the
burst rings symmetrically around zero. The first sample index at which
*any* channel exceeds the threshold is the threshold position t0. The
window used for the amplitude is

```
[ max(t0 - PRETRIGGER, 0) ,  min(t0 + POSTTRIGGER, 150) )
```

This is PRETRIGGER samples before the crossing plus POSTTRIGGER samples from
the crossing on, clamped to the batch. The same pass records the peak
magnitude of each channel for the interlock. If no channel crosses the
threshold, no position is computed. The record is still published, with
zero amplitudes and positions and STATUS bit 0 clear.

### Amplitude of each channel

The amplitude of channel i is the root of its energy over the window:

```
V_i  = floor( sqrt( Σ_window x_i[n]^2 ) )
V'_i = floor( K_i * V_i / 2^16 )          K_i: calibration gain, 1.0 = 65536
```

`amplitude_accumulator` squares and sums one sample per clock into 40-bit
accumulators. 150 full-scale 16-bit samples cannot overflow them. Four
`isqrt` instances take the roots in 21 clocks, one result bit per clock, and
`gain_correction` applies the gains in one clock.

### Position, charge and pickup arrangement

`position_calc` implements two sets of formulas. The set is chosen by
`pickup_mode`, a boot-time setting. With S = V'A + V'B + V'C + V'D:

| output | DIAGONAL pickups                     | ORTHOGONAL pickups             |
|--------|--------------------------------------|--------------------------------|
| X      | K_X·((A+D) − (B+C)) / S − X_OFF      | K_X·(A − C)/(A + C) − X_OFF    |
| Y      | K_Y·((A+B) − (C+D)) / S − Y_OFF      | K_Y·(B − D)/(B + D) − Y_OFF    |
| Q      | K_Q·((A+C) − (B+D)) / S − Q_OFF      | 0 (no formula is defined)      |
| SUM    | K_SUM·S + SUM_OFF                    | K_SUM·S + SUM_OFF              |

The hardest part to follow is how the arithmetic is done:

* Each difference-over-sum ratio comes from its own restoring divider
  (`seq_divider`). The three dividers run in lock step for 50 clocks. The
  ratio r = trunc(|n|·2^24 / d) takes the numerator's sign, so |r| ≤ 2^24
  stands for |ratio| ≤ 1.
* The scaled position is `(K·r) >>> 24 − OFF`, computed in 64 bits and
  saturated to 32-bit signed. K_X, K_Y and K_Q are 32-bit unsigned and give
  the output unit per unit ratio. For example, K_X = 10 000 000 puts X in
  nanometres for a pickup constant of 10 mm.
* SUM is `(K_SUM·S) >> 16 + SUM_OFF`, also saturated. K_SUM has the same
  format as the channel gains.
* A zero denominator gives a ratio of 0 and sets STATUS bit 2. This happens
  when all four amplitudes are zero, or in orthogonal mode when one pair is
  silent.

### Interlock

`interlock` is evaluated once per bunch, after the position is known. A
bunch *violates* when any channel peak is above `peak_max`, or when X or Y
lies outside its [min, max] window. The position is checked only when a
bunch was found. A filter counts violations on consecutive bunches. When the
count reaches `filter` (0 behaves like 1) the interlock fires. It then stays
active for the next 100 bunches, and firing again restarts that count.
`il_on` only gates the output: filtering and holding go on when it is low.

Taken from the source description: the checks on the peaks and the
positions, a selectable filter, the 100-trigger hold, and the IL_ON enable.
This design's own choices: the min/max form of the limits, reading the
filter as "consecutive violations", and the restart of the hold.

### Record, STATUS and COUNTER

Every bunch produces one `sp_result_t`: Va, Vb, Vc, Vd, SUM, Q, X, Y, STATUS,
COUNTER. It appears on `result` with a one-clock `result_valid`. COUNTER is
the 16-bit trigger count from `trigger_counter`. Every external trigger adds
one, and `cnt_sync_reset` clears it, so that several units can be numbered
alike. The count is latched when the delayed trigger starts the acquisition.
The STATUS bits are this design's encoding:

| bit | meaning                                               |
|-----|-------------------------------------------------------|
| 0   | a channel crossed the threshold (bunch found)         |
| 1   | orthogonal formulas used                              |
| 2   | a position denominator was zero                       |
| 3   | this bunch violated an interlock limit                |
| 4   | interlock output active after this bunch              |
| 5   | a trigger was ignored since the previous record       |

### Ethernet payload

`gbe_stream` sends each record as 32-bit words on a valid/ready stream
(`gbe_tdata`, `gbe_tvalid`, `gbe_tready`, `gbe_tlast`):

* **standard**: 10 words, Va Vb Vc Vd SUM Q X Y STATUS COUNTER. Amplitudes,
  STATUS and COUNTER are zero-extended.
* **extended**: the same 10 words, then the first N raw samples of channel
  A, then N of B, C and D, each sign-extended. N is at most 150, so a
  packet has at most 610 words.

N comes from `gbe_raw_n`, where 0 selects the standard stream. It is latched
on the first clock after reset, like an automatic initialisation at boot,
and again on every `gbe_init` pulse, so the stream can be reconfigured while
running. A packet in flight keeps its old N. Raw words take three clocks
each without back-pressure, because of the buffer read latency. Ethernet
framing, the MAC and the SFP transceiver are not part of this RTL: connect
the word stream to them.

## Timing

The numbers below are measured from the clock on which `trig_in` is high to
the clock on which `result_valid` is high. W is the window length.

```
bunch found:     trig_delay + 1183 + W + 77 clocks
no bunch found:  trig_delay + 1186 clocks
```

1024 + 1 of these clocks are the acquisition and 153 are the batch scan. The
remaining stages need W + 3 clocks for the sums, 21 for the root, 1 for the
gain, 52 for the division and 3 for the interlock and the record. After the
record the sequencer waits for the Ethernet packet to finish before it
accepts the next trigger. That is about 12 clocks for a standard packet and
about 12 + 3·4·N for an extended one.

## Configuration inputs

| port            | meaning                                                  |
|-----------------|----------------------------------------------------------|
| `trig_delay`    | trigger delay in clocks (16 bits)                        |
| `threshold`     | magnitude above which a sample is signal                 |
| `pretrig`, `posttrig` | window before / from the threshold crossing        |
| `kgain[0..3]`   | K_A..K_D, 18-bit unsigned, 16 fractional bits            |
| `pickup_mode`   | `PICKUP_DIAGONAL` or `PICKUP_ORTHOGONAL`                 |
| `geom`          | K_X, K_Y, K_Q (32-bit), K_SUM (as kgain), four offsets   |
| `il_cfg`        | X/Y windows, peak limit, filter count, `il_on`           |
| `gbe_raw_n`, `gbe_init` | Ethernet raw sample count and re-initialisation  |

The types and bit positions are in `rtl/sp_pkg.sv`. Parameters of
`libera_sp_top`: `BUF_DEPTH` = 1024, `NSAMP` = 150 and `IL_HOLD` = 100. These
are the sizes of the original system.

## Files

* `rtl/sp_pkg.sv`: shared types, widths, record and configuration structs,
  STATUS bits
* `rtl/libera_sp_top.sv`: top level and sequencer
* `rtl/trigger_delay.sv`, `rtl/trigger_counter.sv`
* `rtl/adc_rate_buffer.sv`
* `rtl/data_extraction.sv`
* `rtl/amplitude_accumulator.sv`, `rtl/isqrt.sv`, `rtl/gain_correction.sv`
* `rtl/position_calc.sv`, `rtl/seq_divider.sv`
* `rtl/interlock.sv`
* `rtl/gbe_stream.sv`
* `tb/tb_<module>.sv`: one self-checking testbench per module
* `tb/tb_sp_workload.sv`: signal-level and trigger-rate runs of the whole design

Each testbench computes its expected values independently, from the
stimulus it drives. It ends by printing
`TB_RESULT checks=<n> failures=<m>`. `tb_libera_sp_top` runs the whole
design at its default sizes for about 120 bunches. It covers found and
missing bunches, a clamped window, both pickup modes, a zero denominator,
ignored triggers, the counter reset, every interlock behaviour, and both
Ethernet streams with back-pressure. It checks every record, every payload
word, the host buffer and the exact latency.

`tb_sp_workload` runs the design the way a laboratory test would. It holds
a beam off centre, with a button ratio of 0.1 in X and 0 in Y, and views it
at signal levels from 600 to 24 000 ADC counts with 40 counts of noise, 40
bunches per level. It checks that the mean position matches the ratios and
that the spread shrinks as the signal grows. With K_X = 10 mm the X spread
falls from about 80 µm to about 2.3 µm over that range. These levels are in
ADC counts and are not calibrated to bunch charge. The same testbench then
fires 30 triggers at spacings of 4000, 1400 and 900 clocks. At the first two
spacings every trigger gives a record. At 900 clocks every other trigger is
ignored, and the record after it is flagged.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/sp_pkg.sv tb/tb_libera_sp_top.sv --top-module tb_libera_sp_top \
    --Mdir obj_top -o sim
./obj_top/sim
```

To run another testbench, replace `tb_libera_sp_top` with its name. Every
run takes well under a second. The code is synthesizable SystemVerilog-2017.
The buffers are plain arrays without reset, so synthesis maps them onto
block RAM. The assertions check the divider lock step and the stream
handshake rule.

## How far this follows the original system

Taken from the source description: the four-channel structure, the two
1024-sample buffers, the 150-sample batch, the threshold and
pretrigger/posttrigger extraction, the square-root-of-sum-of-squares
amplitude, the per-channel gains, both sets of position formulas with
scales and offsets, the 16-bit trigger counter with external reset, the
interlock inputs, filter, 100-trigger hold and enable, and the content of
the standard and extended Ethernet streams.

Choices made here where the description gives no detail:

* the 16-bit sample width and every internal width and fixed-point format
* the magnitude comparison against the threshold, and the exact window
  bounds
* integer square root and truncating division
* Q = 0 in orthogonal mode
* the STATUS bits
* the sequential schedule, and ignoring triggers while busy
* what happens when no bunch is found
* the interlock filter semantics and the limit format
* the Ethernet word format and the valid/ready handshake

The description applies K_Q in the Q formula but leaves it out of its block
diagram of the calculation. This design applies K_Q.

Not included, being outside the FPGA logic: the analog front end (SAW
filter, amplifiers, 0–31 dB attenuator), the ADCs, the host computer with
its control-system software, and the Ethernet MAC and SFP link. The
measured resolution (below 30 µm at low charge, below 3 µm at 300 pC)
depends on those analog parts. This RTL cannot reproduce it.
