# Digital pulse timing for PET in an FPGA

A PET scanner needs the arrival time of each detector pulse to well under a
nanosecond, but a cheap ADC sampling at 100 MS/s only sees the pulse every
10 ns. This RTL recovers the start time of a pulse from **the first sample on
its leading edge**. That sample's value depends on two unknowns:

1. the pulse amplitude (the energy deposited), and
2. where, inside one sampling period, the pulse happened to start.

Because scintillation pulses from a given crystal and photodetector have fixed
rise and fall time constants, every pulse is the same shape scaled by its
amplitude, and the pulse *area* is a fixed multiple of its amplitude. So:

* the first sample is scaled by `reference area / event area`, which turns it
  into the value a pulse of the reference amplitude would have had at the same
  moment; then
* a table of the reference pulse's rising edge, addressed by that voltage,
  returns how long after the pulse start the reference pulse reaches it;
* subtracting that rise time from the sample's own time gives the start time,
  with a resolution of 1/256 of a sample period in the output format.

The design follows a published method for digital timing pick-off in the
front-end FPGA of a pre-clinical PET scanner (analog PMT or SiPM, RC low-pass,
ADC, then everything below in the FPGA at 100 MHz). It also contains the
companion *reference-pulse discovery* logic, which builds the reference pulse
from the detector's own stored pulses and rewrites the table from it.

## Signal chain

```
 ADC samples ─┬─> leading_edge_disc ──trig, first sample, sample number──┐
              │                                                          │
              ├─> area_to_amplitude <──────────── trig ──────────────────┤
              │        │ area                                            │
              │        v                                                 │
              │    normalize  (first_sample * ref_area / area)           │
              │        │ normalized voltage = table address              │
              │        v                                                 │
              │   first_point_lookup <──> reference_pulse_memory         │
              │        │                                                 │
              │        v  time stamp = sample_no*256 - rise_time         │
              │                                                          │
              └─> pulse_discovery <──── trig, area, rise time ───────────┘
                       │ composite pulse (bins)
                       v
                  table_builder ──> writes reference_pulse_memory

 ADC samples ──> pulse_store ──replay──> replaces the ADC at the chain input
```

| Module | Does |
|---|---|
| `pet_timing_pickoff` | Top. Wires the chain, runs one pulse at a time, brings out configuration, results and discovery read-out. |
| `leading_edge_disc` | Digital leading-edge discriminator. First sample `>= threshold` whose predecessor was `< threshold`; tags it with a free-running 24-bit sample counter. |
| `area_to_amplitude` | Sums the first sample and the next `WIN-1` (16 total) samples. |
| `normalize` | `norm_v = floor(first_sample * ref_area / area)`, clipped to 4095, with a serial restoring divider. |
| `reference_pulse_memory` | 4096 x 12-bit simple dual-port RAM: voltage in, rise time out (1 clock read latency), loaded through a write port. |
| `first_point_lookup` | Reads the table and forms `timestamp = {sample_no, 8'b0} - rise_time`. |
| `pulse_discovery` | Averages normalized, time-aligned pulses on a grid 8x finer than the ADC's to build the composite reference pulse. |
| `pulse_store` | Keeps the 16 samples of up to 256 triggered pulses and plays them back through the chain. |
| `table_builder` | Inverts the composite pulse's rising edge into the 4096-entry table. |
| `seq_divider` | Generic shift-and-subtract divider used by `pulse_discovery` and `table_builder`. |
| `pet_timing_pkg` | Shared widths. |

### Input format

One ADC sample per clock while `adc_valid` is high, **unsigned, baseline
removed, pulse positive**. Detector pulses are negative-going; inversion and
baseline subtraction are expected ahead of this block (or in the ADC front end).

### Time stamp format

`timestamp[31:8]` counts samples since reset (it wraps after 2^24 samples,
168 ms at 100 MHz); `timestamp[7:0]` are 1/256 of a sample period (39 ps at
100 MHz). The value is the estimated **start** of the pulse, so it is earlier
than the first sample's number; it is taken modulo 2^32.

## Configuring the table and the reference area

The table is loaded through `lut_we`, `lut_waddr`, `lut_wdata` before use
(the contents are not reset), or built on chip by the discovery loop
described further down. `ref_area` is always supplied from outside. Given a
reference pulse shape `r(t)` with `r(0) = 0` at the pulse start and its peak
`REF_PEAK` counts at time `t_peak`:

* **table entry v** (v = 0..4095) = `round(256 * t_v / Ts)`, where `t_v` is the
  earliest time on the rising edge with `r(t_v) >= v`; for `v >= REF_PEAK`,
  `t_v = t_peak`. Entries saturate at 4095 (16 sample periods).
* **`ref_area`** = the sum of 16 samples of the reference pulse, starting at its
  first sample above `threshold`, averaged over start phases spread uniformly
  across one sample period. This matches how `area_to_amplitude` measures
  events, so a pulse identical to the reference normalizes to itself.

`REF_PEAK` sets how the 4096 table addresses are used: values above the
reference peak all map to the peak time, and an event scaled beyond 4095
sets `norm_saturated`. The testbenches use `REF_PEAK = 3000`,
`threshold = 100`, and the pulse model

```
r(t) = A * [ g(t, tauF) - g(t, tauR) ],  g(t, tau) = tau/(tau - tauC) * (exp(-t/tau) - exp(-t/tauC))
```

which is the double exponential `exp(-t/tauF) - exp(-t/tauR)` (tauR = 0.31 ns,
tauF = 34.5 ns, an LSO crystal on a PMT) after a first-order RC low-pass with
time constant `tauC = 1/(2*pi*f_c)`. The RC filter matters: unfiltered, the
pulse peaks 1.5 ns after its start, so at 100 MS/s the first sample would
almost never lie on the rising edge. With `f_c = 16.7 MHz` the peak is 17.3 ns
after the start.

## Timing, dead time and pile-up

With one sample per clock (latencies in clocks after the clock in which the
first sample is on `adc_data`):

| Event | Clock |
|---|---|
| `trig` (discriminator) | +1 |
| area ready | +16 (`WIN`) |
| normalized voltage ready | +34 (`WIN + AW + 2`) |
| `ts_valid` | +37 (`WIN + AW + 5`) |

Only one pulse is in flight. The discriminator is disarmed from its trigger
until the clock in which the time stamp appears; a leading edge in between is
dropped and flagged on `pulse_missed` for one clock. A pulse that is still
above threshold when the chain re-arms is not taken part-way, because a
trigger needs a below-threshold sample first. Piled-up pulses are not
separated: a second pulse inside the 16-sample window inflates the first
pulse's area.

At 100 MHz the chain therefore handles at most one pulse per 370 ns. The
area window (16 clocks) and the serial divider (18 clocks) make up most of
that; a pipelined divider would cut the dead time to about 20 clocks at the
cost of logic.

## Reference-pulse discovery

The table is only as good as the reference pulse, and the reference pulse of
a real detector and front end is not known in advance. `pulse_discovery`
builds it from many events:

1. On `trig` it captures the event's 16 samples. When the chain produces the
   event's time stamp (and `disc_enable` is high) it takes the event's area
   and the rise time the table returned.
2. It scales every sample by `ref_area * 2^12 / area` (amplitude
   normalization, as in the chain).
3. It places sample k at fine time `k*256 + offset` after the pulse start and
   adds the scaled value to bin `(k*256 + offset) >> 5` of a 256-bin sum
   memory, counting it in a count memory. `offset` is the rise time when
   `disc_align` is high and 128 (half a sample) when it is low. There are 8
   bins per sample period.
4. `disc_rd_req`/`disc_rd_bin` read back a bin's count, sum and average
   (SUM_W+6 = 38 clocks later); `disc_clear` zeroes all bins (256 clocks).

Processing an event takes about 70 clocks; events that arrive while
discovery is busy are not accumulated and pulse `disc_dropped`.

### Closing the loop

Two more blocks let the whole procedure run on one fixed set of pulses
without a host computing anything:

* `pulse_store` (`store_capture`, `store_clear`, `store_count`,
  `store_full`) keeps the 16 samples of each triggered ADC pulse, up to 256
  pulses (49,152 bits).
* `replay_start` plays the stored pulses back in place of the ADC. Each
  goes out as two zero samples, its 16 samples, then zeros until the chain
  and discovery are idle, so nothing is dropped. The chain times each one
  with the table currently loaded, and discovery bins it. `replaying` is
  high throughout (the ADC is ignored) and `replay_done` marks the end.
* `build_start` makes `table_builder` scan the bins and rewrite the table.
  It joins (time 0, value 0) and the centres of the non-empty bins on the
  rising edge by straight lines, skips any bin lower than the highest so
  far, and stops just past the peak. Each entry gets the time at which the
  lines first reach its voltage; entries above the peak get the peak time.
  While `build_busy` it owns the discovery read port and the table write
  port. A build takes about 5,500 clocks.

A replay paces itself at about 110 clocks per pulse: 28,000 clocks for a
full store. The whole loop below, with three aligned passes, takes about
135,000 clocks (1.4 ms at 100 MHz).

The sequence is: fill the store; then clear, replay with `disc_align` low
and build; then clear, replay with `disc_align` high and build, repeating
the aligned step a few times. The reason for the half-sample offset in the
unaligned pass: if every first sample were put at time 0, the first table
would say that the first-sample value is reached immediately. Every pulse
would then be aligned to time 0 again, and the loop would only reproduce
its starting point.

How far it gets, in the end-to-end test (100 MS/s, 16.7 MHz RC, 256 stored
pulses), as the spread of timing errors about their mean:

| Table | Spread |
|---|---|
| straight line from 0 to the peak time | 1.51 ns |
| built: 1 unaligned + 1 aligned pass | 0.85 ns |
| built: 1 unaligned + 3 aligned passes | 0.67 ns |
| built: 1 unaligned + 5 aligned passes | 0.60 ns |
| computed from the exact pulse shape | 0.20 ns |

The loop does improve the table, but slowly. The unaligned average is a
version of the rising edge smeared over one sample period. Each aligned
pass removes only part of that smearing. The time origin of a built table
is also offset from the true pulse start by a constant (about 1 ns here),
which matters only for absolute timing, not for coincidence differences
between channels with the same table. The earlier part of the test, with
discovery fed live events and the exact table loaded, rebuilds the reference
pulse to within 3.5% of its peak in every bin with at least 3 entries.

## How well it times

Noise-free results from the testbenches (12-bit ADC with rounding, random
amplitude from 600 to 4000 counts, random start phase):

| ADC rate | RC 33.3 MHz | RC 16.7 MHz | RC 10 MHz |
|---|---|---|---|
| 70 MS/s | 0.97 ns rms | 1.44 ns rms | 0.43 ns rms |
| 100 MS/s | | 0.20 ns rms | |
| 140 MS/s | 0.20 ns | 0.042 ns | 0.022 ns |
| 300 MS/s | 0.018 ns | 0.029 ns | 0.037 ns |
| 500 MS/s | 0.024 ns | 0.036 ns | 0.039 ns |
| 1000 MS/s | 0.025 ns | 0.042 ns | 0.068 ns |

These are systematic errors only: amplitude normalization from a window that
starts at the first sample (the part of the pulse before it is missed), and
the table's 1/256-sample steps. Real detectors add photon statistics and
electronic noise, which dominate measured resolutions. Rates above 100 MS/s
are simulated at one sample per clock; the design is meant to run at
100 MHz, so those rates would need a faster clock or a parallel
(multi-sample-per-clock) front end, which is not provided. At 70 MS/s the
first sample is sometimes past the reference peak and the table clips to
the peak time, which is why the errors there are larger.

## Parameters

Defaults are in `pet_timing_pkg` and the top's parameter list.

| Parameter | Default | Meaning |
|---|---|---|
| `SW` | 12 | ADC sample width; also the table address width (`LAW`) |
| `WIN` | 16 | samples summed for the area (160 ns at 100 MHz, 4.6 fall times) |
| `AW` | 16 | area width, `SW + log2(WIN)` |
| `DW` | 12 | table entry width (rise times up to 16 sample periods) |
| `FW` | 8 | fraction bits of the time stamp and table (1/256 sample) |
| `CW` | 24 | sample counter width |
| `DBB` | 3 | discovery bins per sample period = 2^DBB |
| `DNB` | 256 | discovery bins, `2^DBB * (WIN + 2^(DW-FW))` |
| `NP` | 256 | pulses the pulse store holds |

Only the 100 MHz clock, the time constants used in the tests and the block
structure come from the published method; every width above, the window
length, the discriminator rule, the divider, the one-pulse-at-a-time control
the discovery grid, the store size and the table-building rule are choices
made here. The table size was chosen so that the 48 Kbit table is about 2% of
the RAM of a mid-size FPGA (an Altera Stratix II EP2S60), which is the
memory budget reported for the timing logic. With the discovery bins and the
pulse store the design uses 108 Kbit, about 4.3% of that device.

## Where this departs from the method as published

* The discriminator is a separate block; the published block diagram starts
  at the area and normalization blocks.
* The area is used directly; the area ratio equals the amplitude ratio, so no
  area-to-amplitude constant is applied.
* Reference-pulse discovery is meant to run in a separate FPGA
  configuration. Here the store, the replay path and the table builder sit
  next to the timing chain in one design, and the stored pulses are
  processed by the timing chain itself. Discovery can also be fed live
  events instead of replayed ones.
* The method describes one unaligned and one aligned averaging step. Here
  the aligned step is meant to be repeated, and the unaligned pass places
  pulses half a sample after the origin (see above). How the final pulse
  becomes a table is not part of the published description: the
  straight-line interpolation between bin centres is this design's choice.
* Pile-up is not handled; dead-time losses are only flagged.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/pet_timing_pkg.sv \
    tb/tb_pet_timing_pickoff.sv --top-module tb_pet_timing_pickoff -o sim
./obj_dir/sim
```

`-y rtl +libext+.sv` lets Verilator find each module in `rtl/<name>.sv`;
only the package has to be named first. The same command, with another
testbench file and top name, runs any of the testbenches below.

| Testbench | Covers |
|---|---|
| `tb_pet_timing_pickoff` | Whole design at default sizes: 60,000 samples of modelled pulses, close pairs and one-sample spikes. Checks every time stamp bit-exactly against an integer model, the 37-clock latency, dead-time losses, clipped normalizations, timing error under 1 ns on isolated pulses, and the composite pulse from discovery. Then runs the closed loop (fill the store, replay and build once unaligned and three times aligned) and checks that the built table times fresh pulses with a spread under 0.8 ns and under 0.6 of the straight-line table's. |
| `tb_table1_workloads` | ADC rates 70 to 1000 MS/s against RC cutoffs 33.3, 16.7, 10 MHz; prints the table above and checks sub-sample RMS error. |
| `tb_leading_edge_disc` | Trigger rule, arming, counter, missed edges. |
| `tb_area_to_amplitude` | Window sums with gaps in `s_valid`; 15-clock latency. |
| `tb_normalize` | Quotients, clipping, zero area; 18-clock latency. |
| `tb_reference_pulse_memory` | Read/write, read-during-write returns old data. |
| `tb_first_point_lookup` | Time stamp arithmetic and wrap; 3-clock latency. |
| `tb_pulse_discovery` | Bin sums, counts and averages in both modes, dropped events, clear, read-out latency. |
| `tb_pulse_store` | Capture into slots, full and clear, replay framing, waiting for the sink, done pulse. |
| `tb_table_builder` | Builds from a known piecewise-linear composite with empty and out-of-order bins; checks every entry against the exact inverse, the peak fill, monotonicity, one write per entry. |

The simulations take well under a second each.
