# Table-driven unipolar SPWM controller for a single-phase H-bridge

This is an 8-bit, fully synchronous sinusoidal PWM generator for a single-phase
full-bridge (H-bridge) inverter of the kind used after a photovoltaic DC/DC
stage. It compares two sine references, 180 degrees apart, with one
triangular carrier and drives the four bridge switches. The result is a
three-level (unipolar) output voltage. The sine and the triangle both come
from small block-RAM lookup tables, not from arithmetic. Only one quarter of
the sine period is stored. The other three quarters are made by reading the
table backwards and by mirroring the samples about mid-scale. Two settings can
be changed at run time from outside: the switching frequency (a 3-bit divider
select) and the modulation index (an IEEE-754 single-precision number between
0 and 1). The dead time between the two gates of each leg is also programmable.

## Number format

Every sample is an unsigned 8-bit word in offset binary. 128 means zero, 255
is the positive peak and 1 is the negative peak. The carrier uses the same
scale and runs from 0 to 255. A sine sample X from the positive half has the
negative-half partner

    Yx = X - 2*(X - 128) = 256 - X

so no signed arithmetic is needed until the amplitude is scaled.

## Block structure

```
 clk, sel ──► clk_divider ──► tick         (sample enable of every register below)
 mi ────────► mi_conversion ──► index      (to sinref 1 and sinref 2)

 control_unit ── carrier addr ─► bram_carrier ─► carrier_delay ─► carrier (to both comparators)
      │       ── sine addr ────► bram_sine ─► X ─► processing_unit ─► 256 - X
      │
      └─ flag ─► ref_mux 1 (X when flag=0) ─► sinref 1 ─► sine_ref1 ─► spwm_comp B ─► dead_time B ─► Tb+, Tb-
         flag ─► ref_mux 2 (X when flag=1) ─► sinref 2 ─► sine_ref2 ─► spwm_comp A ─► dead_time A ─► Ta+, Ta-
```

| module | role |
|---|---|
| `spwm_pkg` | word width `N = 8`, table depths, sample type, quarter enum |
| `clk_divider` | turns the 10 MHz board clock into the sample enable `tick`, rate set by `sel` |
| `mi_conversion` | float32 modulation index M to 8-bit `index = 128 + floor(M*128)`, saturating |
| `control_unit` | carrier address (wraps every 64), quarter-wave sine address (up/down scan), half-cycle `flag` |
| `bram_sine` | 768-word quarter-wave table, synchronous read |
| `bram_carrier` | 64-word triangle table, synchronous read |
| `processing_unit` | negative-half value `256 - X` |
| `ref_mux` | picks `X` or `256 - X` by `flag`; the second instance has the choice reversed |
| `sinref` | scales a reference by M: `128 + floor((ref-128)*(index-128)/128)` |
| `carrier_delay` | carrier register that lines the carrier up with the scaled references |
| `spwm_comp` | `pwm = sine >= carrier` |
| `dead_time` | makes the complementary gate pair of one leg with a programmable gap |
| `spwm_top` | wires it all together |

## Scanning a quarter-wave table

This part is the least obvious. `bram_sine` holds word
`k = 128 + round(127*sin(pi/2*(k+0.5)/768))`, for k = 0..767. The half-step
offset puts the samples at the middle of each angular step. This makes the
mirror exact: sample 767 read a second time lies as far past 90 degrees as the
first reading lay before it.

`control_unit` walks through four quarters, one address step per tick:

| quarter | addresses | flag | ref 1 (`ref_mux` 1) | ref 2 (`ref_mux` 2) |
|---|---|---|---|---|
| 1 | 0 → 767 | 0 | X | 256 - X |
| 2 | 767 → 0 | 0 | X | 256 - X |
| 3 | 0 → 767 | 1 | 256 - X | X |
| 4 | 767 → 0 | 1 | 256 - X | X |

At each turn the end address is read twice, so one sine period is exactly
4 × 768 = 3072 samples. The carrier address counts 0..63 on the same tick, so
there are exactly 48 carrier periods in each sine period. The triangle's 64
samples take 33 distinct values, 0, 8, 16, ... 255. That is the duty-cycle
resolution of each switching period. The tables use
synchronous reads: the data for an address comes out on the next tick.
`control_unit` therefore delays `flag` by one tick, so that the flag stays
with the sample it selects.

## Pipeline and timing

Everything runs on `clk`. Nothing is clocked by a divided clock: registers
load on the one-cycle enable `tick`.

- tick k: `control_unit` issues the addresses of sample k.
- tick k+1: both tables present sample k. The multiplexers and the
  processing unit are combinational.
- tick k+2: `sinref` 1 and 2 and `carrier_delay` present sample k (the
  `sine_ref1`, `sine_ref2` and `carrier` outputs). The comparators are
  combinational.
- `dead_time` registers the gates one `clk` later. When the pwm value has
  changed, it waits a further `dead_time` clocks before it turns the new gate
  on.

`clk_divider` uses three counters. `ctr1` divides by 13 (`clkdiv13`). `ctr2`
is an 8-bit counter, and `bclkx8 = ctr2[sel]` divides by a further
2^(sel+1). `ctr3` divides by 8 again to give `bclk`, which is produced but not
used. `tick` marks each rising edge of `bclkx8`. With a 10 MHz `clk`:

| sel | tick rate | switching freq. fc = tick/64 | fundamental fm = tick/3072 |
|---|---|---|---|
| 0 | 384.6 kHz | 6.01 kHz | 125.2 Hz |
| 1 | 192.3 kHz | 3.00 kHz | 62.6 Hz |
| 2 | 96.2 kHz | 1.50 kHz | 31.3 Hz |

The ratio fc/fm is fixed at 48 by the table depths. Changing `sel` moves both
frequencies together. For a different output frequency at the same switching
frequency, change the depth of the sine table (see "Changing the design").
None of the settings gives exactly 50 Hz or 60 Hz from a 10 MHz clock. A mains
frequency needs another board clock, another divider ratio, or another sine
table depth: for example, a 922-word quarter table at sel = 1 gives 52.1 Hz.

## Modulation index

`mi` is an IEEE-754 single-precision number. `mi_conversion` turns it into
`index = 128 + floor(M*128)` with shifts only: no floating-point unit. M = 1
would give 256, which does not fit in 8 bits, so the index saturates at 255.
Values above 1, infinity and NaN give 255 too. Zero, negative numbers and
denormals give 128. So the largest amplitude gain is 127/128, and
over-modulation (M > 1) is not possible. The scaled references stay within
1..254, and the carrier spans 0..255. So in every carrier period the comparator output is 1 at the
carrier's lowest point and 0 at its peak: no carrier period is ever left
without a pulse, even at full index.

## Gate outputs and dead time

Leg A takes reference 2 and drives `ta_p` (S1, upper switch) and `ta_n` (S2,
lower switch). Leg B takes reference 1 and drives `tb_p` (S3) and `tb_n` (S4).
In each leg the lower gate is the inverse of the upper gate, with a gap
inserted at every edge: `dead_time`. When the comparator output changes, the
gate that is on turns off on the next clock. The other gate turns on after
the new value has held for `dead_time` more clocks. Both gates are therefore
off for `dead_time + 1` clocks, counted in 100 ns steps at 10 MHz. A pulse
shorter than the gap disappears. Both gates are off while `rst` is high. An
assertion in `dead_time` checks that the two gates of a leg are never on
together.

The comparator rule is "sine equal to or greater than the carrier". The two
legs see opposite references, so the bridge voltage Va - Vb takes the levels
+1, 0 and -1 (unipolar SPWM).

## Top-level ports (`spwm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 10 MHz board clock |
| `rst` | in | 1 | synchronous reset, active high |
| `sel` | in | 3 | switching-frequency select |
| `mi` | in | 32 | modulation index, float32, 0..1 |
| `dead_time` | in | 8 | dead time in clocks (gap = dead_time + 1) |
| `ta_p`, `ta_n`, `tb_p`, `tb_n` | out | 1 | gates of S1, S2, S3, S4 |
| `sine_ref1`, `sine_ref2`, `carrier` | out | 8 | scaled references and aligned carrier, for observation |
| `tick` | out | 1 | sample enable |

Parameters: `SINE_DEPTH_P` (768) and `CARRIER_DEPTH_P` (64).

## Where this design makes its own choices

The overall structure comes from the published architecture. It includes the
up/down quarter-table scan, the flag, the `256 - X` negative value, the two
opposite multiplexers, amplitude scaling by M, the `>=` comparators and the
inverted lower gates. The following were not specified there and are
choices of this design:

- Table depths 768 and 64. They give fc/fm = 48, the ratio used to illustrate
  SPWM. The sine amplitude of 127, the half-step sampling phase and the full
  0..255 triangle are also choices here.
- A single clock domain with a sample enable, instead of a clock made by a
  clock-management primitive. The divider chain is reconstructed from its
  signal names (`clkdiv13`, `ctr1`, `ctr2`, `ctr3`, `bclkx8`, `bclk`, `sel`).
  Using `bclkx8` as the sample rate is a choice.
- The arithmetic of the amplitude scaling: a multiply, a floor shift by 7,
  and a gain of 127/128 at full scale.
- The float-to-fixed conversion truncates and saturates.
- The carrier "delay" element is read as a one-sample alignment register.
  The dead time is a separate counter per leg, counted in board-clock cycles.
- All reset behaviour: addresses to 0, references to mid-scale, gates off.

The fundamental frequency is not set by a separate phase-step input. It
follows from the sample rate and the sine table depth (step size 1).

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares the module with values computed independently in the testbench,
using real-valued `$sin` for the tables and a float32 encoder for the index.
Each ends with a `TB_RESULT checks=N failures=M` line and has a watchdog.

`tb_spwm_top` runs the whole controller at its default sizes. It covers one
full sine period at sel = 0, M = 0.8 and a 10-clock dead time. It then
switches to sel = 1 and M = 0.5, and finally to M = 1.0 with dead time 0.
On every tick it checks both scaled references, the carrier and all four
gates against a reference model. It also checks the tick spacing, 48 carrier
peaks per sine period, the absence of shoot-through and the length of every
dead gap. It counts and requires both half cycles, both kinds of table turn,
all three bridge levels, dead gaps, and the frequency and index changes. It
runs in well under a second.

`tb_spwm_fundamental` checks what the modulation index is for. It takes the
bridge voltage, Va - Vb in units of the DC link with a leg in its dead gap
counted as 0, and integrates it against a sine and a cosine over one
fundamental period. It does this at M = 0.25, 0.5, 0.8 and 1.0. The
fundamental must be within 0.02 of M × (127/128) × (254/255), and the DC
part must be near zero. Measured values: 0.2515, 0.4967, 0.7945 and 0.9924.

To simulate, for example:

```
verilator --binary --timing --assert rtl/spwm_pkg.sv rtl/*.sv tb/tb_spwm_top.sv \
  --top-module tb_spwm_top -Mdir obj && ./obj/Vtb_spwm_top
```

Run it from the folder that holds `rtl/`: the tables are loaded from
`rtl/sine_quarter.hex` and `rtl/carrier.hex` by that relative path.

## Changing the design

- **Table contents.** `rtl/sine_quarter.hex` holds
  `128 + round(127*sin(pi/2*(k+0.5)/D))` for k = 0..D-1. `rtl/carrier.hex`
  holds `(255*t + C/4)/(C/2)`, with t = i for i <= C/2 and t = C - i
  otherwise. If you change `SINE_DEPTH_P` or `CARRIER_DEPTH_P`, regenerate the
  matching file. The testbenches assume the default sizes.
- **Word width.** `spwm_pkg::N` sets the width. The tables and the
  float conversion follow the same formulas at other widths, but the hex
  files must be regenerated.
- **Sample rate.** `tick` is the only enable. Any other enable source can
  replace `clk_divider`, provided the enable pulses are at least two clocks
  apart, or are on every clock (the pipeline also works with `tick` held high).

## Not covered

The power stage itself is outside this RTL: the four MOSFETs with diodes,
the DC-link capacitor and the PV source. The gate outputs are plain logic
levels, with no driver timing modelled.
