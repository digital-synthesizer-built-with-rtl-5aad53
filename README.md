# A direct-digital-synthesis keyboard synthesizer

This is a small polyphonic synthesizer for an FPGA board. The board has pushbutton keys, an
AC97 audio codec and two ZBT SRAMs. Every pressed key sounds a pure sine tone at the pitch of its note.
The tones are summed and sent to the codec 48,000 times a second. The output can be recorded
into the SRAMs and played back. An optional attack/decay/sustain/release (ADSR) envelope shapes
the loudness of each note.

The main idea is **direct digital synthesis with one shared sine table**. Each key has its own
16-bit phase counter. Once per audio sample the counter adds a per-note step called the *tuning
word*. The angles are converted to amplitudes one key after another through a single
quarter-wave sine ROM. The system clock (27 MHz) runs about 560 times faster than the sample
rate. So one ROM can serve every key, and no key needs its own copy of the table.

The RTL follows a published description of a student-built synthesizer. Where that
description was silent, the choices made here are listed in
[Departures and choices](#departures-and-choices-made-here).

## Signal chain

```
 keys ──► note_input ──► tone_generator ──► adsr_shifter ──► mixer ──► ac97_interface ──► codec
          (debounce,      (7 phase wheels,    (envelope,       (sum,      (AC-link frames,
           tuning words)   note mux, ROM)      optional)        clamp)     48 kHz "ready")
                               ▲                  ▲              ▲  │
                 control_module│ sel_angle        │ magnitude    │  └──► zbt_interface ──► zbt_driver ×2 ──► ZBT SRAM ×2
                               │ read_value ──────┼──────────────┘        (recorder)  ◄── playback samples to the mixer
                               │           adsr_controller
```

| Module | Role |
|---|---|
| `synth_top` | Wires everything together. All board pins are plain ports. |
| `synth_pkg` | Shared widths, the `sample_t`/`phase_t`/`tword_t` types and the `mode_e` enum. |
| `note_input`, `debouncer` | Debounce the keys. Output one 11-bit tuning word per key (0 when released). Pulse `reset_envelope` on each press. |
| `tone_generator` | Holds the phase accumulators, the note mux, `angle_correction` and `wave_table`. |
| `phase_accumulator` | 16-bit wrap-around counter. Adds the tuning word on `ready`. |
| `angle_correction` | Maps a full-circle angle to a quarter-table index plus a sign. |
| `wave_table` | 16384 × 16-bit quarter-sine ROM, computed at elaboration. |
| `control_module` | After each `ready`, walks `sel_angle` over the keys and strobes `read_value`. |
| `mixer` | Adds the key samples with clamping against positive overflow. Selects live sound or the recording. |
| `ac97_interface` | Builds AC-link frames, writes the codec's volume registers and makes the `ready` pulse. |
| `zbt_interface`, `zbt_driver` | The recorder and the pipelined-SRAM pin drivers. |
| `adsr_controller`, `adsr_shifter` | The per-key envelope and the shift that applies it. |

## One sample period, clock by clock

The hardest part of the design is the timing between the blocks. Everything is in the system
clock domain except the AC-link shift register. Let `ready` be high in clock cycle *r*:

| cycle | what happens |
|---|---|
| r | The mixer copies its running sum to `sample_out` and clears the sum. Every phase accumulator adds its tuning word. `control_module` loads `sel_angle ← 0` and clears `read_value`. |
| r+1, r+2 | `sel_angle = 0`. The note mux passes key 0's new angle to `angle_correction`, and the index is registered at the end of the cycle. |
| r+3, r+4 | `sel_angle = 1`. The ROM output for key 0 has been read and negated if needed, so `wave_value` holds key 0's sample. |
| … | Each key is selected for two clocks, and its sample appears two clocks later. |
| r+2k+3, r+2k+4 | `wave_value` holds key *k*'s sample. `read_value` is high in r+2k+4 only, so the mixer adds it exactly once, in the second, settled cycle. |
| r+2N+1 onward | `sel_angle` stays at N (7). That mux input is tied to angle 0, which reads amplitude 0, so later `read_value` strobes add nothing. |

`read_value` simply toggles every clock after `ready` (it is high in r+2, r+4, …). The two-clock
latency of the tone pipeline (index register, then ROM register) is what lines those strobes up
with the middle of each key's window. **If you add a pipeline stage to the tone path, shift
`read_value` by the same amount.** `adsr_controller` registers its magnitude twice for the same
reason. Seven keys need 17 of the 562 clocks in a sample period.

## Phase wheel and tuning words

A 16-bit accumulator stepped at fs = 48 kHz by M produces f = fs·M / 2¹⁶. The resolution is
fs/2¹⁶ = 0.73 Hz, so rounding M to an integer costs at most 0.37 Hz. `note_input` computes the
words at elaboration time with `M = round(f/48000·65536)` and `f = 440·2^(semitones/12)`. The
seven keys are C D E F G A B. `octave_select` 0–3 picks octaves 2–5. B5 needs M = 1349, and
octave 6 would overflow the 11-bit tuning word. Over these 28 notes the mean pitch error is
0.20 Hz and the largest is 0.36 Hz. The testbench measures both figures.

A released key has M = 0, so its accumulator **stops at its last angle**. Its sine lookup then
returns a constant, and without the envelope that constant is still added to the mix as a DC
offset. It cannot be heard, but it uses up headroom in the sum. With `adsr_enable` = 1, a key whose
envelope has ended has magnitude 0 and contributes exactly 0.

## Quarter-wave table

Only the first quarter of the sine is stored. With A = 0x4000 (90°), `angle_correction`
computes the following from the two top bits of the angle θ:

| quadrant | index | sign |
|---|---|---|
| 0 | θ | + |
| 1 | 2A − θ | + |
| 2 | θ − 2A | − |
| 3 | 4A − θ | − |

At the exact quadrant boundaries, 2A − θ and 4A − θ equal A, one past the last table entry. The
index is clamped to A − 1. Entry A − 1 holds round(32767·cos(2π/65536)) = 32767, the same value
as the true peak, so the clamp is exact. Negation is two's complement (invert and add one) on
the ROM output. The table holds `round(32767·sin(2π·i/65536))` for i = 0…16383 and is filled by
an `initial` loop using `$sin`. Synthesis tools that evaluate such loops turn it into a ROM.
Otherwise, replace it with a memory file generated from the same formula.

## Mixer arithmetic

Samples travel as plain 16-bit vectors that hold two's-complement values. The mixer adds each
key's sample:

* if the running sum or the new value is negative, it wraps normally (ordinary two's-complement
  addition);
* if both are positive and the sum would exceed 0x7fff, the sum is set to 0x7fff.

Negative overflow is **not** clamped. With many keys in the negative half-wave, the sum can wrap
to a large positive value. This matches the original rule. Add a symmetric clamp in
`mixer.sv` if you need it. In playback mode the mixer ignores the keys and copies the
recorder's `mem_value` to `sample_out` on each `ready`.

## Recorder and the ZBT SRAMs

`zbt_interface` treats the two SRAMs as one long track:

* **Record** (`mode` = 1). One clock after each `ready`, the sample just sent to the codec is
  written at `w_index` of the current RAM. When `w_index` reaches `MAX_RAM_ADDRESS`, writing
  moves to the start of RAM 2 (`mem1_full`). At the end of RAM 2 recording stops (`mem2_full`).
  Leaving record mode keeps the position, so the next recording appends. `clear_recording`
  rewinds the track to the start of RAM 1.
* **Playback** (`mode` = 2). Entering the mode rewinds the read position. Each `ready` issues
  one read. The word comes back four clocks later and is held on `mem_value`. The mixer outputs it
  at the next `ready`, one sample late. After the last recorded word the output is 0.

`zbt_driver` hides the pipelined SRAM timing. A request in cycle c puts the address and `we_b`
on the pins in cycle c+1. For a write, the data is driven in cycle c+3, two RAM clock edges after
the address. For a read, the data is captured at the end of c+3 and appears on `rdata` with
`read_valid` in c+4. The bidirectional data pins are split into `ram_dq_o`, `ram_dq_oe` and
`ram_dq_i`; join them with a tristate buffer at the board level. The RAMs are meant to be
clocked by a deskewed copy of `clk` from the FPGA's clock manager, which is not part of this RTL.
With the default 2¹⁹-word parts the track holds 2²⁰ samples, about 21.8 s.

## AC97 link and the `ready` strobe

The codec drives the 12.288 MHz bit clock. `ac97_interface` counts 256 bits per frame, which
gives 48 kHz. It raises `sync` for the 16 bits of the tag slot and shifts out, MSB first:

* the tag (frame valid, slots 1–4 valid);
* one codec register write (slots 1–2);
* the sample in both PCM slots (3 and 4), padded with four zero LSBs to the codec's 20 bits.

The register writes rotate through master volume, headphone volume, PCM-out volume and
record select, all set to 0 dB or unmuted. `sync` and `sdata_out` change on the rising bit-clock edge
for the codec to sample on the falling edge. The sample is latched at the frame boundary.

A toggle flip-flop changes state at each frame boundary. Three flip-flops synchronise it into
the system clock, and each change gives a one-cycle `ready` pulse. `ready` therefore comes 3–4
system clocks after the frame boundary. The mixer's new sample is ready long before the next
boundary, so each frame carries the sum computed during the previous sample period.

## ADSR envelope

With `adsr_enable` = 1, each key's sample is arithmetically shifted right by 16 − m, where m is
the key's magnitude (0–16). Magnitude 0 gives exactly 0. A key press restarts that key's
envelope:

* **attack**: m rises 0 → 16, one step every tA/16 clocks;
* **decay**: m falls to m_S, one step every tD/(16 − m_S) clocks. m_S is 16, 14, 12 or 8
  (`sustain_sel` 0–3), so this divide is a shift;
* **sustain**: m holds m_S for tS clocks;
* **release**: m falls to 0, one step every tR/m_S clocks. This is the only real divide, and
  it is shared by all keys.

Times are given in quarter seconds (`t_attack` … `t_release`, 4 bits each) and multiplied by
`CYCLES_PER_QUARTER` (6,750,000 at 27 MHz). The envelope runs on time from the press, not on
the key being held. A key released early still stops sounding at once, because its tuning word
drops to 0. `adsr_controller` keeps one step counter, phase and magnitude per key. It outputs the
magnitude of the key on `sel_angle`, delayed two clocks to match the tone pipeline. The original
description proposes this envelope as an extension; it was never built there. With
`adsr_enable` = 0 the design behaves as the original on/off keyboard.

## Parameters (`synth_top`)

| parameter | default | meaning |
|---|---|---|
| `N_NOTES` | 7 | keys. `sel_angle` is `$clog2(N_NOTES+1)` bits wide; the original figure shows 3 bits. |
| `DEBOUNCE_CYCLES` | 270,000 | 10 ms at 27 MHz |
| `CYCLES_PER_QUARTER` | 6,750,000 | ADSR time unit, 0.25 s at 27 MHz |
| `RAM_ADDR_W`, `RAM_DATA_W` | 19, 36 | 512K × 36 ZBT parts |
| `MAX_RAM_ADDRESS` | 2¹⁹ − 1 | last word used in each RAM |

Fixed in `synth_pkg`: 16-bit phase, 11-bit tuning word, 16-bit samples, 14-bit table index.
`FS_HZ` (48 kHz) and `LOWEST_OCTAVE` (2) are parameters of `note_input`. `mode` encoding:
0 play, 1 record, 2 playback, 3 acts as play.

## Departures and choices made here

Taken from the original description: the 16-bit phase and 11-bit tuning words; stepping on the
codec's sample strobe; the serial lookup with the mux input tied to zero; the quarter-wave rules
and invert-plus-one negation; the one-clock start delay and two clocks per key; the toggling
`read_value`; the mixer's clamping rule; the zero padding to 20 bits; the two RAMs used in
series with `clear_recording` and resumable recording; the ADSR rules.

Chosen here, where the description gives no detail:

* the number of keys (7) and their notes, and the meaning of `octave_select`;
* the debouncer design and its 10 ms;
* reset, which is synchronous and active high everywhere;
* a 14-bit index plus sign between angle correction and ROM, instead of a 16-bit word, with the
  clamp described above;
* the ROM scale (±32767), its one-clock read latency and the two-clock tone pipeline;
* which codec registers are written, and the same sample on both channels;
* separate read and write RAM selects (the description names a single `ram_select`), stopping
  playback at the end of the recording, and storing the sample in the low 16 bits of each word;
* the zbt_driver request interface and pin timing;
* the ADSR per-step counters (instead of dividing a count since the press), the 4-bit time
  settings, the `adsr_enable` switch, and magnitude 0 meaning silence.

Not included: the FPGA clock manager that makes the deskewed RAM clock, the codec, the SRAMs and
the key switches. They are board parts; simulation models of the codec and the SRAMs are in
`tb/`.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. Shared test code is in `tb/synth_ref_pkg.sv` (reference
note, sine and clamped-add arithmetic), `tb/zbt_sram_model.sv` and `tb/ac97_codec_model.sv`.
With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/synth_pkg.sv tb/tb_synth_top.sv --top-module tb_synth_top
./obj_dir/Vtb_synth_top
```

* `tb_synth_top` runs the whole design at reduced sizes: 16-clock debounce, 16-word RAMs and a
  ten-sample ADSR time unit. It checks every output sample in play and record mode against a
  model built from ideal sines. It also covers debounce rejection, chords, an octave change,
  saturation, recording across both RAMs until full, playback, clearing and the envelope, and
  fails if any of these never happens.
* `tb_synth_full` runs `synth_top` with all defaults. It holds a two-key chord through the full
  10 ms debounce, checks about 570 samples, then records 60 samples and plays them back. It
  takes a few seconds.
* The unit testbenches check the blocks exhaustively where that is cheap: all 65,536 angles
  and all 16,384 ROM words. They also check the latencies given above.

Limits of the verification: the RAM-full path is simulated only with 16-word RAMs, and the ADSR
only with short time units. The AC-link timing is checked against the model in `tb/`, not
against a real codec.
