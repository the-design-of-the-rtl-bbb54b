# VLA fringe rotator: a digital fringe-frequency synthesizer

As the earth turns, the fringe pattern of a two-antenna interferometer sweeps
across the sky. The correlator output therefore oscillates at the "natural
fringe frequency". It reaches about 111 Hz for the longest baselines of the
VLA at 24 GHz. The fringe rotator cancels this oscillation by offsetting the
local oscillator of each antenna. The offset is a slowly changing frequency
plus a starting phase, both chosen so that all antenna pairs see zero fringe
frequency. The settings are recomputed every couple of seconds, because the
natural fringe rate follows a sine of hour angle.

This RTL is the digital core of one such unit, after the synthesizer of VLA
Electronics Division Memo 124. It makes a 100 kHz waveform from a 50 MHz
clock. The waveform's frequency can be offset by up to ±500 Hz in steps of
1.9 mHz. Its starting phase can be set in 0.72° steps relative to a 100 kHz
station reference. In the VLA this waveform is mixed with 10 MHz and filtered
to 10.1 MHz. The result is the IF reference of the phase-locked 2–4 GHz local
oscillator, so the offset reaches the received signal. That mixing and
phase-locking is analog and not part of this RTL.

## The idea: a divide-by-500 counter that sometimes counts 0 or 2

Divide 50 MHz by N = 500 and you get 100 kHz. Suppose that, on one clock, the
first counter stage is held, so the counter counts 0 instead of 1. The output
then slips back by 360°/500 = 0.72°. If it counts 2 instead, the output moves
forward by the same amount. Do this at a steady rate f_b and the output
frequency becomes (50 MHz ± f_b)/500. So a fringe offset of ±Δf needs
f_b = 500·Δf: up to 250 kHz for 500 Hz.

The adjustment pulses come from a **binary rate multiplier**. It is clocked at
f0 = 12.5 MHz and gives M·f0/2^18 pulses per second, where M is the 18-bit
rate word. Its output is divided by 50 and re-timed to the 50 MHz clock. Putting
the numbers together:

    offset (Hz) = ± f0 · M / 2^18 / 50 / 500 = ± 500 · M / 2^18

The largest offset is 499.998 Hz and the step is 1.907 mHz. In the other
direction, the control computer finds M as round(|offset| · 2^18 / 500).

The phase is set by **presetting the counter**. The preset happens at a rising
edge of the 100 kHz reference. A counter preset to n_p there runs n_p counts
ahead of the reference, so its output leads the reference by 2π·n_p/500.

## Signal path

```
 50 MHz ─┬─ /4 ──ce(12.5 MHz)──► rate_multiplier ──► /50 ──► pulse_synchronizer ──b──┐
         │                       (M, latched at load)                                  │
         └───────────────────────────────────────────────► phase_counter (/500) ◄─────┘
                                                           addsub_stages (/4, adds 0/1/2)
                                                           div5_stage x3 (/125)
                                                                 │ wave (n < 250)
 ref_100k ──► phase_set_sync ──load──► presets/latches            ▼
 serial words ──► serial_receiver ──► word1, word2      output_stage ──► fringe_out, led_n
```

Everything runs on one 50 MHz clock with synchronous, active-low reset.

| Module | Role |
|---|---|
| `fringe_pkg` | Word layouts (`word1_t`, `word2_t`, `phase_bits_t`) and `phase_number()` |
| `serial_receiver` | Shifts in 24-bit words, MSB first; two holding registers |
| `phase_set_sync` | Turns a set request into a load pulse at the next reference rising edge |
| `pulse_divider` | Divide-by-DIV of a pulse stream; used as /4 (f0 enable) and /50 |
| `rate_multiplier` | 18-stage binary rate multiplier |
| `pulse_synchronizer` | One clock-wide pulse `b` per rising edge of the /50 output |
| `addsub_stages` | First two counter stages with the add/subtract gating |
| `div5_stage` | Presettable divide-by-five stage |
| `phase_counter` | The /500 counter: `addsub_stages` + three `div5_stage`, output wave |
| `output_stage` | 0°/180° phase switch (AND/NAND) and LED drive (NOR) |
| `fringe_rotator_top` | One complete unit |

## Rate multiplier

An 18-bit counter `chain` advances once per f0 enable. On each advance exactly
one bit goes from 0 to 1: the lowest bit that was 0. This is
`rising = ~chain & (chain + 1)`, which is one-hot, or zero when the counter
wraps. "Bit m rises" therefore happens at f0/2^(m+1), and two such trains
never coincide. The rate word gates the trains, MSB to the f0/2 train and LSB
to the f0/2^18 train. The gated trains are ORed. Over one full cycle of 2^18
advances exactly M pulses appear. After k advances the count is
Σ over the set bits of floor((k + 2^m)/2^(m+1)). The testbenches use this
closed form as their reference.

The pulses are unevenly spaced. Dividing by 50 makes the spacing of the
adjustment pulses nearly regular. The original hardware used three cascaded
6-bit TTL rate multiplier chips. One 18-bit counter with the same trains is
functionally identical.

## Add/subtract stages and the phase number

The two low counter bits {F2, F1} count like this:

| b | sign | F1 | F2 | net count |
|---|---|---|---|---|
| 0 | x | toggles | toggles if F1 = 1 | +1 |
| 1 | 1 | holds | toggles | +2 (count added) |
| 1 | 0 | holds | holds | 0 (count removed) |

Sign 1 therefore raises the output frequency. The control computer sets sign 1
when the computed fringe rate −ω0·D·(C + B·H1/2) is negative. That means the
antenna's phase lead is falling, so the local oscillator must be raised to
cancel it.

The counter's carry is F2 falling from 1 to 0. It enables three divide-by-five
stages, which all advance in the same clock, so the whole counter is
synchronous. Read as a number, the counter state is

    n = 100·d100 + 20·d20 + 4·d4 + 2·F2 + F1        (d = 0..4)

This is exactly how the phase word codes n_p. B1–B3, B4–B6 and B7–B9 are the
three base-5 digits. B10 and B11 go straight into F2 and F1. So loading the
phase word needs no arithmetic. Each field goes into its own stage.

The output `wave` is registered and is high while n < 250. It rises when the
counter wraps to 0. It is a 50 % square wave when no counts are added or
removed.

## Commands and the reference-synchronised load

Each unit takes two 24-bit words, sent MSB first.

* **Word 1**: bit 23 is the sign of rate. Bits 22:5 are the rate word M. Bits
  4:0 are ignored.
* **Word 2**: bits 23:13 are B1..B11, the initial phase. Bits 12:0 are ignored.

The serial link is a simple strobe interface, chosen for this RTL:

1. Present each bit with a one-clock `ser_bit_valid`.
2. After 24 bits, give a one-clock `ser_word_load`, with `ser_word_sel`
   choosing the word (0 = word 1, 1 = word 2).

The words wait in holding registers, and the unit keeps running on its old
settings. A one-clock `set_req` arms `phase_set_sync`. At the next rising edge
of `ref_100k`, that block gives one `load` pulse, which does four things:

* latches M into the rate multiplier and clears its chain;
* latches the sign into the add/subtract stages;
* presets the counter to n_p;
* clears the /4, the /50 and the synchronizer.

So every setting starts from a known state at a known reference edge.

The 180° phase switch is a plain input, `phase_switch`, because the command
bit that would carry it was never assigned. `led_n` is the NOR of the counter
waveform and the reference. It drives the LED active low, so the LED is dark
only while both are low. The LED is dimmest when the two are in phase (lit half
the time) and brightest in antiphase. Between those it flickers at the fringe
offset.

## Timing

| Event | Clocks |
|---|---|
| `ref_100k` rises → `load` high | `load` is high in the clock after the 3rd clock edge |
| `load` → counter shows n_p | next edge (4 clocks = 80 ns after the reference edge) |
| counter → `wave` / `fringe_out` | 1 clock |
| /50 output rises → `b` | `b` high after the 2nd edge that samples it high |
| `b` → counter shows +2 / 0 | next edge |

The 80 ns preset delay (2.9°) and the one-clock output delay are the same in
every unit. They therefore cancel in the phase difference between antennas.
The reset-timing need is 12.5 µs (0.5° at 111 Hz), and 80 ns is far inside it.
The adjustment pulses are at least 200 clocks apart, so the synchronizer's
two-clock spacing rule always holds. Assertions check the one-clock widths of
`b` and `load` and the range of each /5 stage.

## Where this RTL departs from the original, and choices it makes

* **Single clock.** The original ran the synchronizer and the first two counter
  stages in ECL, the rest in TTL, with a level translator and ripple clocking.
  Here everything is synchronous at 50 MHz, with enables in place of ripple
  clocks. The synchronizer's F1 is clocked by the 50 MHz clock and fed by an
  edge detector. It is not an asynchronously clocked flip-flop reset by F2.
* **f0 = 12.5 MHz as a /4 enable.** The rate-multiplier clock follows from the
  stated 0–12.5 MHz range and the rule M = offset·2^18/500. How it was derived
  from 50 MHz is not given; a /4 is assumed.
* **Clearing on load.** Clearing the rate multiplier, /4, /50 and synchronizer
  at each load is a choice made here for repeatability.
* **Output waveform.** The choice n < 250 (50 % duty, rising at n = 0) is made
  here. The original's exact output tap is not given.
* **Command interface.** The strobes, the word-select bit and the separate
  phase-switch input are invented here. The word contents and bit order follow
  the original.
* **Out-of-range digits.** A phase digit of 5–7 cannot come from a correct
  word. A /5 stage preset to 5–7 returns to 0 at its next count.
* **Not included.** Left out are the SSB mixer and crystal filter, the 2–4 GHz
  YIG oscillator and its phase-lock loop, the ECL-to-TTL translator, the LED
  itself, and the reference and clock sources. Also left out is the control
  computer that works out the settings. The workload testbench does that
  calculation itself. Word addresses on the shared control link, and how the
  four units at an antenna share it, were never fixed and are not modelled.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

* `tb_rate_multiplier`: full 2^18 cycles for several words, against the closed
  form.
* `tb_pulse_divider`, `tb_pulse_synchronizer`, `tb_addsub_stages`,
  `tb_div5_stage`, `tb_phase_counter`: random stimulus against cycle models.
* `tb_serial_receiver`, `tb_phase_set_sync`, `tb_output_stage`: interface and
  timing checks.
* `tb_fringe_rotator_top`: the whole unit at full size, about 1.35 M clocks.
  It applies three settings in turn:
  1. +500 Hz for one full rate-multiplier cycle;
  2. −111 Hz, loaded while the unit is running, with the phase switch toggled;
  3. zero offset.

  Every clock it compares the counter with an independent model. It also counts
  each mechanism and requires each to occur: added counts, removed counts,
  aligned loads, reload while running, phase switch and LED.
* `tb_workload_reset_interval`: reset intervals at full size. The
  settings come from the linear-fit formulas of the original design: the
  initial phase is −2πD(A + B + B·H1²/12) and the offset is −ω0·D·(C + B·H1/2).
  * Case 1 is the longest arm at 24 GHz (−111.48 Hz) over a full 2.5 s
    interval (125 M clocks).
  * Case 2 is an extended baseline at 495.8 Hz, over 1.0 s.
  * Case 3 uses the low-lock rule (phase 2π minus the high-lock value, sign
    inverted), over 0.5 s.

  Throughout, the output phase stays within 1.5 counts (about 1.1°) of the
  ideal linear phase. It runs for about two minutes.

## Simulating

The package must be read first. From the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_fringe_rotator_top \
    -y rtl -y tb +libext+.sv rtl/fringe_pkg.sv tb/tb_fringe_rotator_top.sv
./obj_dir/Vtb_fringe_rotator_top
```

For any other testbench, replace the top module and file name. All testbenches
use default sizes except `tb_rate_multiplier` and `tb_pulse_divider`, which
restate theirs. For synthesis, `fringe_rotator_top` is the top. It is about
137 flip-flops.

## Changing it

* `RM_BITS` sets the rate-multiplier length. It takes the top bits of the
  18-bit rate field.
* `SYNC_DIV` (/50) and `RM_PRESCALE` (/4) set f_b and hence the offset range.
  The range is ± (50 MHz / RM_PRESCALE) / SYNC_DIV / 500.
* The /500 structure (4 × 5 × 5 × 5) is fixed by the phase-word coding. To
  change N, change both `phase_counter` and `fringe_pkg::phase_number`.
* A different control link only needs a replacement for `serial_receiver` that
  fills `word1_t` and `word2_t`.
