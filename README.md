# FPGA electronic organ: PS/2 keyboard in, sine tone out

A small electronic organ for an FPGA board with a 50 MHz clock (an Altera
DE0-Nano class board). A PS/2 keyboard is the manual: pressing one of thirteen
letter keys plays one note of the octave C4 to C5, releasing it stops the
note. The tone is made by a numerically controlled oscillator (NCO) that walks
through a 64-entry sine table, and leaves the design as a stream of signed
8-bit samples, one every 1024 clocks (48.83 kHz), for a digital-to-analog
converter.

The design is built from two classic teaching circuits, each kept as its own
module so it can be reused and tested alone:

* **tone generation** — a modulo-M frequency divider and an NCO (phase
  increment register, phase accumulator, sine look-up table);
* **PS/2 keyboard interface** — a synchroniser with a falling-edge detector
  and a three-state receiver state machine.

The DAC itself and VGA graphics, which a complete organ would also have, are
not part of this RTL.

## Signal path

```
ps2_clk, ps2_data
      |
  ps2_sync      3-stage clock synchroniser + falling-edge detector (psfall), 1-stage data register (psd)
      |
  ps2_rx        state machine mir / pomik / prenos, 11-bit shift register -> byte + valid
      |
  key_decoder   make / F0-break / E0 handling, scan code -> note number, key_on
      |
  note_step_rom note -> phase increment, computed at elaboration
      |
  nco           increment register, ACC_W-bit accumulator, clock-enabled by ...
      |           ... freq_divider (modulo SAMPLE_DIV): one tick every 1024 clocks
  sine_rom      64 x 8-bit signed table, addressed by the accumulator's top 6 bits
      |
  output reg    sample (0 while no key is held), sample_valid, tone_sq
```

All logic runs on the single system clock. The PS/2 lines are asynchronous
inputs and are only sampled in `ps2_sync`. Reset is synchronous and active
high throughout.

## Frequency divider versus NCO

Both ways of making a tone from a fast clock are here, and the difference
between them is the core idea of the tone generator.

**Divider** (`freq_divider`): a counter runs 0..M-1 and wraps, so its
terminal count `tc` (one clock wide) and its top bit `msb` both have the
frequency f_clk / M. Only integer ratios are possible. Dividing a 50 Hz clock
to get 4 Hz (ratio 12.5) shows the limitation: M = 12 gives 4.17 Hz, M = 13
gives 3.85 Hz, nothing in between.

**NCO** (`nco`): an N-bit accumulator adds a step Δf on every sampling tick
and wraps modulo 2^N. It overflows, on average, f_s·Δf / 2^N times a second,
so the frequency resolution is f_s / 2^N and grows finer with every
accumulator bit, at the price of some jitter in the individual periods. From
50 Hz, a 6-bit accumulator with Δf = 5 gives 3.906 Hz and a 10-bit one with
Δf = 82 gives 4.004 Hz. Instead of using only the top bit (a square wave),
the top 6 bits are a phase that addresses the sine table, which turns the
ramp into a sine of the same frequency.

In the organ the NCO has a 16-bit accumulator and is clocked by a divider
(`freq_divider` with M = 1024), which makes the 48.83 kHz sampling tick. The
frequency resolution is then 0.745 Hz, and every note lands within 0.2 % of
equal temperament (A4 plays at 440.3 Hz).

| note | key | scan code | step | plays |
|------|-----|-----------|------|-------|
| C4  | A | 1C | 351 | 261.5 Hz |
| C#4 | W | 1D | 372 | |
| D4  | S | 1B | 394 | |
| D#4 | E | 24 | 418 | |
| E4  | D | 23 | 442 | |
| F4  | F | 2B | 469 | |
| F#4 | T | 2C | 497 | |
| G4  | G | 34 | 526 | |
| G#4 | Y | 35 | 557 | |
| A4  | H | 33 | 591 | 440.3 Hz |
| A#4 | U | 3C | 626 | |
| B4  | J | 3B | 663 | |
| C5  | K | 42 | 702 | 523.0 Hz |

`step(n) = round(261.6256 · 2^(n/12) · 2^ACC_W · SAMPLE_DIV / CLK_HZ)`, worked
out by `note_step_rom` during elaboration, so changing the clock, the
sampling divider or the accumulator width retunes the table automatically.

The sine table holds `round(127 · sin(2π·i/64))` for i = 0..63, also computed
during elaboration; its read is combinational.

## PS/2 reception

A PS/2 keyboard drives both lines. It sends 11-bit frames: a start bit 0,
eight data bits LSB first, an odd-parity bit and a stop bit 1; the receiver
reads each bit on a falling edge of the PS/2 clock (10–16.7 kHz).

`ps2_sync` registers the data line once (`psd`) and passes the PS/2 clock
through three flip-flops. `psfall = stage3 & ~stage2` is high for exactly one
system clock per falling edge; the first two stages are the synchroniser.
Reset loads 1 into every stage so no false edge appears.

`ps2_rx` shifts `psd` into the top of an 11-bit register `w` on every
`psfall`. Its state machine:

| state | action | leaves when |
|-------|--------|-------------|
| `mir` (idle) | b ← 0 | psfall with psd = 0 (start bit) → `pomik` |
| `pomik` (shift) | on psfall: b ← b + 1 | psfall with b = 9 (stop bit) → `prenos` |
| `prenos` (transfer) | if w[0] = 0 and w[10] = 1: data ← w[8:1], valid | always → `mir` |

After the eleventh edge w[0] is the start bit, w[8:1] the byte, w[9] the
parity bit and w[10] the stop bit. Only the start and stop bits decide
whether a byte is accepted. The odd parity is checked too, but only reported
(`parity_ok`) with the byte. A frame with a bad start or stop bit produces a
one-clock `frame_err` instead of `valid`. `valid` comes two clocks after the
`psfall` of the stop bit. There is no timeout: a frame cut short leaves the
receiver waiting for the missing edges, and the next frame's edges complete
it.

`key_decoder` follows the PS/2 scan code set 2 convention: a key sends its
code when pressed and `F0` plus the code when released; some keys add an
`E0` prefix. Extended keys and non-organ keys are ignored. The organ is
monophonic: the last key pressed sounds, and releasing a key that is not the
one sounding changes nothing. Held keys repeat their make code, which just
reselects the same note.

## Interfaces and timing of `organ_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | system clock, `CLK_HZ` (50 MHz) |
| `rst` | in | 1 | synchronous reset, active high |
| `ps2_clk`, `ps2_data` | in | 1 | keyboard lines, pins 1 and 3 of the 6-pin PS/2 socket (pin 5 +5 V, pin 2 GND); asynchronous |
| `sample` | out | 8 | signed sine sample, 0 when no key is held |
| `sample_valid` | out | 1 | one-clock strobe with each new sample, every `SAMPLE_DIV` clocks |
| `tone_sq` | out | 1 | square wave of the note (accumulator MSB), low when no key is held |
| `key_on`, `note` | out | 1, 4 | key held; note 0 (C4) .. 12 (C5) |
| `key_make`, `key_break` | out | 1 | strobes: organ key pressed; sounding key released |
| `rx_data`, `rx_valid`, `rx_parity_ok`, `rx_frame_err` | out | 8,1,1,1 | what the PS/2 receiver got |

Parameters: `CLK_HZ` (50 000 000), `SAMPLE_DIV` (1024), `ACC_W` (16),
`ROM_ADDR_W` (6), `SAMPLE_W` (8). A new key selects a new step one clock after
the receiver's `valid`. The step register is loaded every clock, and the new
step is first added at the next sampling tick. The accumulator keeps running
while the organ is silent, so a note starts at an arbitrary phase.

## What is the design's own choice

The divider, the NCO structure, the 64 × 8-bit sine table with amplitude 127,
the synchroniser/edge-detector and the receiver state machine follow a set of
lecture slides on an FPGA electronic organ, which describe these circuits and
the 50 Hz → 4 Hz divider/NCO comparison (the tests reproduce its numbers).
The slides leave open how the parts are joined into an organ. The following
were chosen for this RTL and are easy to change:

* the 50 MHz clock, the 48.83 kHz sampling rate and the 16-bit accumulator;
* the key layout (piano-like, home row plus the row above) and equal
  temperament from C4;
* monophonic play and silencing the output with no key held;
* accepting a byte with wrong parity (flagged, not dropped), which keeps the
  receiver to the start/stop test of its state machine;
* the `valid` / `frame_err` strobes of the receiver, the reset values and the
  synchronous reset.

Not included: the DAC (the `sample` / `sample_valid` ports are where it
connects; on a board without a DAC a PWM or sigma-delta stage would go there),
VGA graphics, and polyphony.

## Files

| file | contents |
|------|----------|
| `rtl/organ_pkg.sv` | receiver state type, frame length, break prefix, scan codes of the organ keys |
| `rtl/freq_divider.sv` | modulo-M divider |
| `rtl/nco.sv` | phase increment register and accumulator |
| `rtl/sine_rom.sv` | sine look-up table |
| `rtl/ps2_sync.sv` | PS/2 synchroniser and falling-edge detector |
| `rtl/ps2_rx.sv` | PS/2 frame receiver state machine |
| `rtl/key_decoder.sv` | scan codes to note and key_on |
| `rtl/note_step_rom.sv` | note to phase increment |
| `rtl/organ_top.sv` | the organ |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run as a failure. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/organ_pkg.sv tb/organ_top_tb.sv --top-module organ_top_tb -o sim
./obj_dir/sim
```

Replace `organ_top_tb` by any other `<module>_tb` to test one block.

What the testbenches cover:

* `freq_divider_tb` — 50 Hz input divided by 12 and 13: count sequence, `tc`,
  `msb`, and 50 and 46 output periods in 12 s.
* `nco_tb` — 6-bit/Δf = 5 and 10-bit/Δf = 82 at 50 Hz sampling: phase every
  cycle against a model, 80 and 82 periods in 1024 samples (3.906 Hz and
  4.004 Hz), hold without `sample_en`, step-write latency.
* `sine_rom_tb` — all 64 entries against a hand-written quarter wave and the
  sine's symmetries.
* `ps2_sync_tb` — random PS/2 clock: one `psfall` per falling edge, at the
  exact clock, none on rising edges; `psd` one clock behind.
* `ps2_rx_tb` — 40 random frames, `valid` latency, wrong parity flagged, bad
  stop bit rejected, idle edge with data high ignored.
* `key_decoder_tb` — every organ key pressed, repeated and released, key
  take-over, foreign and extended keys.
* `note_step_rom_tb` — all steps against separately computed values.
* `organ_top_tb` — the whole organ at its default parameters, driven by a
  PS/2 keyboard model at 12.5 kHz: plays C4, A4 (taking over from C4) and C5,
  measures each tone's frequency from the zero crossings of the sample stream
  (within 0.5 %), checks amplitude ±127, the 1024-clock sample spacing and
  silence with no key, and requires that each mechanism (press, release,
  take-over, foreign key, rejected frame, parity flag, silent ticks) happened.
  About 7 million clocks, a few seconds of simulation.
