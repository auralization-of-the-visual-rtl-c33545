# Auralizer: turning a camera image into music in hardware

This design listens to a video camera. It reads the colour of every region
of the picture and turns each region into a pitched, harmonically rich
tone. It also follows a coloured LED that a performer waves in front of the
camera, and turns its movements into drum hits and tempo. A step sequencer
sits between picture and sound. It can store what the camera saw and play
it back in patterns. Effects are applied both to the spectra and to the
finished audio, and the result leaves through an AC'97 codec at 48 kHz.

Most of the sound comes from one large inverse FFT of 65,536 points. The
transform runs once per new set of harmonics, about 60 times a second.
Each run produces 800 audio samples: 1/60 s at 48 kHz. The 65,536-point
size gives a frequency resolution of 0.73 Hz per bin. Only the first 800
outputs are used, so a change in the image is heard within one 800-sample
window. To keep every partial continuous from one window to the next, each
coefficient is turned in phase before the transform, by the amount its
sinusoid has advanced since time zero.

## Signal flow

```
 YCrCb pixels ─► video_decoder ─► HSV + x,y ─┬─► csa ──────────► colour packets ─┐
                                            └─► sprite_detect ─► rule packets ──┤
                                                                                ▼
 switches/buttons ─► hw_input_xlate ─► tempo, controls ─────────► video_input_xlate
         │                    │                                      │ sample packets
         │                    ▼                                      ▼
         │              sequencer controls ─────────────────────► sequencer ─► sampler trigger ─┐
         │                                                            │ spectrum (32768 bins)    │
         │                                                            ▼                          ▼
         │ filter/reverb settings ───────────────────────────────► fd_fx                      sampler
         │                                                            ▼                    (15 drum units)
         │                                                       audio_ifft ─► 800-sample       │
         │                                                            windows                   │
         │                                                            ▼                          │
         │                                                     channel_mapper ◄──────────────────┘
         │ parameter packets                                          ▼ {channel, value}
         └──────────────────────────────────────────────────────► td_fx (patchboard + effects)
                                                                      ▼ left, right
                                                                 audio_encoder ─► AC'97 codec
```

The codec sets the pace of the audio end. `audio_encoder` pulses `ready`
once per 48 kHz frame. On that pulse the channel mapper takes one
synthesiser sample, the sampler sums its voices, and every time-domain
effect advances by one sample. Everything upstream of the IFFT runs at its
own pace and hands over whole packets.

## The word-serial bus (`pkt_bus`)

Every link between two units carries the same four signals, bundled in the
`pkt_bus` interface:

| signal | driven by | meaning |
|---|---|---|
| `re` | sender | a word is on the bus; stays high through a burst |
| `woe` | receiver | the receiver can take a word |
| `start` | sender | this word is the first of a packet |
| `data[W-1:0]` | sender | the word |

A word moves on each clock where `re` and `woe` are both high. A word that
is offered but not taken stays on the bus unchanged. An assertion in the
interface checks this rule on every link. `start` restarts the receiver's
packet state, so a sender can abandon a packet and begin again. The word
width differs per link: 8, 16 or 32 bits.

## Video side

**`video_decoder`** converts each YCrCb pixel to RGB using BT.601 in Q8
fixed point. It then derives hue, saturation and brightness:
- Brightness is max(R,G,B).
- Saturation is 255·(max−min)/max.
- Hue lies on a 0–255 circle, with red at 0, green at 85 and blue at 171.

It also counts pixel coordinates from the line and frame markers. Latency
is two clocks.

**`csa`** finds the dominant colour of each cell of a 16×16 grid. Each cell
has three 256-entry lists indexed by hue:
- a pixel count (20 bits);
- a sum of saturation (28 bits);
- a sum of brightness (28 bits).

A finished band of 16 cells is analysed when the pixel stream enters the
next band. A 32-bin window slides once around the circular hue list, and
the window with the highest count gives the peak hue. The saturation and
brightness sums over that window, divided by its count, give the mean
saturation and brightness of that colour. Each cell then yields a
four-byte packet `{cell, hue, saturation, brightness}`. The lists are
double-buffered by band parity, so the next band accumulates while the
previous one is analysed. A band of 1024×48 pixels lasts about 49k clocks.
Analysing its 16 cells takes about 9.3k clocks. `overrun` flags a band that
ended before the previous analysis finished.

**`sprite_detect`** tracks one object by colour. A pixel counts as part of
the object if all three hold:
- its hue is within ±12 of a target;
- its saturation is at least 96;
- its brightness is at least 160.

The block accumulates the count and the x and y sums of matching pixels
over a frame. At the next frame start, two small serial dividers give the
centroid. Four rules are then evaluated and sent as three-byte packets
`{rule, value[13:8], value[7:0]}`:

| rule | fires when | value |
|---|---|---|
| 0 | the object crossed the vertical line at mid-frame, left to right | x speed in pixels per frame |
| 1 | the same line, right to left | x speed |
| 2 | the object is inside the central box | pixel count |
| 3 | the object entered the box this frame | 1 |

A value of 0 means the rule did not fire.

## Control

**`hw_input_xlate`** maps the board controls:

| control | what it does |
|---|---|
| `sw[3:0]` | sample memory address |
| `sw[7:4]` | step address |
| `mode_sw` | sequencer (1) or continuous (0) mode |
| buttons 0–4 | store sample, clear sample, play sample, store step, clear step (one pulse per press) |
| button 5 | sends the 32-bit `user_io` word `{unit, parameter, value[15:0]}` to the time-domain effects |
| `tempo_src` | tempo from an internal divider (`TEMPO_DIV·(1+tempo_sel)` clocks, default 1/8 s at 68 MHz) or from the video rules |
| `fx_sw`, `knob` | filter enable, reverb enable, reverb decay |

**`video_input_xlate`** turns the picture into sound parameters. It keeps
the latest colour of every cell. On each tempo pulse it advances to the
next vertical band, so the picture is scanned left to right over 16 steps.
It then builds a sample packet from the 16 cells of that band, with one
oscillator per cell and 128 harmonics each:

- **Hue** sets the fundamental. A 256-entry table rises as 2^(hue/64) over
  four octaves from bin 150 (about 110 Hz).
- **Brightness** sets where, along the harmonic series, the energy sits.
  The centre of a window over the harmonics is brightness·128/256.
- **Saturation** sets how wide that window is: 2^(saturation[7:5])
  harmonics. Pale colours are bright and buzzy; saturated ones are narrow
  and pure.
- The window shape comes from a 1024-entry Welch table, w = 255·(1−d²).

Each harmonic becomes one `{bin, value}` word, giving 16×128 = 2048 words
per sample. Rule packets go through an eight-entry table. A rule can
trigger a sampler address, which rides along in the next sample packet, or
produce a tempo pulse. By default:
- rules 0 and 1 (line crossings) trigger drum units 1 and 2;
- rule 3 (entering the box) is a tempo pulse.

## Sequencer and spectral effects

**`sequencer`** stores samples in 16 slots and plays them through 16 steps.
- Each step is a rest, the current input or a stored slot.
- `store_step` assigns a slot to a step; pressing it together with
  `play_sample` assigns the current input instead.
- In sequencer mode each tempo pulse advances the step pointer and plays
  that step.
- In continuous mode each newly completed input is played.

Playing scatters the sparse sample into a 32,768-entry bin buffer.
Colliding harmonics add, saturating at 0xFFFF. The buffer is then streamed
out as one full spectrum packet and cleared as it goes. A sampler address
stored with the sample is sent to the drum sampler at the same moment.

**`fd_fx`** works on that spectrum as it streams past. There are two
effects:
- **Filter.** Each bin is multiplied by a response curve, (H+1)/256, where
  H comes from a 256-entry table indexed by the top bits of the bin number.
- **Reverb.** The last four dry spectra are kept. Each is added to the
  current one with weight (decay/256)^j, where j is its age. This is a
  four-tap FIR across successive spectra: a sound rings on over the
  following windows.

## Synthesiser (`audio_ifft`, `r22_stage`, `cordic_rot`)

This is the core of the design and the hardest part to follow.

**What it computes.** The input is N/2 = 32,768 amplitudes a_k, one per
positive-frequency bin. For a window that starts at audio sample D, the
output is:

    x[n] = a_0 + 2·Σ_k a_k·cos(2π·k·(n + D)/N),   n = 0 … M−1

This is the real part of an N-point inverse DFT of a Hermitian spectrum.
Each bin has been rotated by the phase 2π·k·D/N. D grows by M = 800 every
window, so every partial carries on across window boundaries as if one
endless transform were running.

**How.**
1. **Buffer.** A complete packet is written into one of two input banks. A
   partial or restarted packet never disturbs the bank in use. A job starts
   only when a whole new set has arrived and the spare output bank is free.
2. **Feed.** For t = 0 … N−1 the job forms the full Hermitian spectrum on
   the fly. Bin k and bin N−k both read a_k, with conjugate phases. A
   CORDIC turns each coefficient by −(k·D mod N)/N of a circle.
3. **Transform.** The inverse transform is computed as a forward transform
   of the conjugated input, and only the real part is kept. The forward
   transform is a radix-2² single-path delay-feedback pipeline: LOGN/2
   = 8 stage pairs (`r22_stage`). Within a pair:
   - the first butterfly has a feedback delay of L/2;
   - the second butterfly has a delay of L/4 and applies the trivial −j
     factor in its last quarter;
   - a CORDIC applies the twiddle W^(m·{0,2,1,3}[quarter]).

   No twiddle table is stored. After the N spectrum words, N zeros follow
   to flush the delay lines.
4. **Collect.** Results leave in bit-reversed order. A counter picks out
   the outputs whose natural index is below M. Each is scaled by 2^−6,
   saturated to 16 bits and written in natural order into the spare output
   bank.
5. **Play.** The output bus hands out one sample per audio frame. At the
   end of a window the player switches to the new bank if it is ready; it
   pulses `new_window`. Otherwise it plays the same bank again and pulses
   `replay`. D still advances by M, so the next set of harmonics starts in
   phase.

**Timing.** One job takes 2N clocks plus about 2·LOGN·ITER clocks of
pipeline. At N = 65,536 that is about 0.13 M clocks, or about 2 ms at
68 MHz, against a 16.7 ms window. The CORDICs are fully pipelined and
accept one rotation per clock. `cordic_rot`:
- folds the angle into ±90°;
- runs 18 shift-and-add iterations;
- removes the CORDIC gain with a Q16 multiply by 1/K;
- has a latency of ITER+2 clocks.

Datapath width grows one bit per butterfly stage (LOGN+18 bits), so
nothing overflows inside the transform.

## Drums, channels and time-domain effects

**`sampler`** has 15 sample units, each a ROM holding one sound and four
{active, counter} voices.
- A start packet carrying address a starts a voice in unit a−1. It uses a
  free voice, or steals the oldest if all four are busy.
- On each audio frame every unit sums ROM[counter] over its active voices,
  saturates the sum to 16 bits and advances the counters.
- A voice that reaches the end of its sound is freed.

The ROMs hold synthetic sounds computed at elaboration: decaying square
tones on even units and decaying noise on odd ones (`drum_val`). These
stand in for recorded drum samples.

**`channel_mapper`** serialises, once per audio frame, the synthesiser
sample and the 15 drum sums as two-word packets `{8'h00, channel}, value`.
A lookup table maps source to channel; it resets to the identity, so source
0 is the synthesiser and source i is drum unit i.

**`td_fx`** is a patchboard with effect units. It has these channels:

| output channel | source | input channel (sink) | feeds |
|---|---|---|---|
| 0 | synthesiser | 0 | FIR input |
| 1–15 | drum units | 1 | gain input |
| 16 | FIR | 2 | gain control |
| 17 | gain | 3, 4 | mixdown A, B |
| 18 | mixdown | 5 | echo input |
| 19 | echo | 6, 7 | left, right outputs |

Each sink listens to one source; all sinks start on channel 0. On each
frame every unit reads its sinks as they stood and writes its own output
channel. Each unit therefore adds exactly one frame of delay, and units can
be chained in any order, even in loops.

- **FIR**: 8 taps in Q1.15; at reset it passes the signal through.
- **Gain**: Q8.8. In mode 1 it also scales by (1 − envelope of the control
  sink). With its own input as control it is a compressor; with another
  channel it is a ducker.
- **Mixdown**: two inputs with Q8.8 weights.
- **Echo**: a 4096-sample delay line with delay, feedback and wet-level
  parameters.

Parameter packets are four bytes: `{unit channel, parameter, value[15:8],
value[7:0]}`. Unit channel 255 is the patchboard itself, with
parameter = sink and value = source.

**`audio_encoder`** drives the AC'97 link from the system clock. It
samples the codec's 12.288 MHz bit clock, so the system clock must be at
least about four times faster. Each frame is 256 bit clocks:
- a tag slot marking slots 1–4 valid;
- slots 1 and 2: register writes that alternate between master volume and
  PCM volume, both set from `volume`;
- slots 3 and 4: the left and right samples.

`ready` marks each frame and paces the audio chain.

## The top module (`auralizer_top`)

The top has plain ports only:
- decoded pixels (`y_in`, `cr_in`, `cb_in`, `pix_valid`, `hsync_in`,
  `vsync_in`) from an external NTSC decoder;
- the user controls;
- the AC'97 link pins, to an external codec;
- a configuration port: `cfg_sel` 0 writes the filter response, 1 the
  channel map, 2 the video rule table;
- status outputs: band and step position, tempo, colour-analysis busy and
  overrun, new and replayed windows, the audio samples, voices started, and
  sprite frames dropped.

The main parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `H_PIX`, `V_PIX` | 1024, 768 | frame size |
| `LOGN` | 16 | transform size 2^LOGN |
| `M` | 800 | samples per window |
| `NOSC`, `NHARM` | 16, 128 | oscillators per band and harmonics each |
| `NSU` | 15 | drum units |
| `SLEN` | 2048 | samples per drum sound |
| `EDEPTH` | 4096 | echo length in samples |
| `TEMPO_DIV` | 8,500,000 | clocks per internal tempo pulse |

## Where this design departs from the original plan

- **Sprite detection is simplified.** The original plan finds blobs with a
  difference-of-Gaussians filter on progressively downsampled images and
  correlates several objects frame to frame. Here a single object is found
  by a colour threshold. Its four rules use fixed geometry, set by
  parameters.
- **All storage is on chip.** The original shares one external ZBT SRAM
  between sample memory, reverb memory and the large IFFT delay lines, and
  time-shares a single CORDIC because of that memory's bandwidth. Here the
  delay lines are arrays, and each stage pair has its own CORDIC. The
  transform therefore runs at one word per clock.
- **Drum sounds are synthetic.** They are computed at elaboration instead
  of being recorded.
- **Several choices are this design's own**, because the original plan
  does not specify them:
  - the hue-to-pitch and colour-to-harmonic-window mapping;
  - the rule table format and the default rule actions;
  - the bus `start` semantics;
  - packet headers;
  - the effect parameter formats;
  - the switch and button assignment;
  - band stepping on the tempo pulse.
- **Scene-change effects are not built.** The original plan also measures
  how fast the bands change and uses that to steer the effects, for
  example more reverb for slow scenes. Here the effect settings come only
  from the user controls.
- **No PS/2 or MIDI control.** The control unit takes switches, buttons
  and a 32-bit user I/O word only.
- **Only four effect units are built.** The patchboard has FIR, gain,
  mixdown and echo. It is not a bank of hundreds of units.
- **Not included:** the analogue NTSC decoder chip and the AC'97 codec
  chip. They are outside the top, connected through its ports.

## Verification

Every block has a self-checking testbench in `tb/`, named `tb_<block>`.
Each compares the block with an independent model written in the
testbench. Each ends by printing `TB_RESULT checks=N failures=F` and has a
watchdog. Highlights:

- `tb_audio_ifft` compares every output sample with a direct evaluation of
  the cosine sum, including the phase advance across windows. It also
  checks the replay of a window when no new set has arrived.
- `tb_cordic_rot` compares 500 random rotations with real arithmetic and
  checks the latency.
- `tb_csa` and `tb_video_decoder` compare with bit-exact models of the
  histogram search and the colour conversion.
- `tb_sampler` models voice allocation, including stealing the oldest
  voice.
- `tb_td_fx` checks the patchboard and each effect.
- `tb_auralizer_top` runs the whole chain at reduced sizes: 512×320
  frames, a 1024-point transform, 8-sample windows, 8 harmonics and 3 drum
  units. A moving red square crosses the trigger line. The test counts and
  checks:
  - colour and rule packets;
  - tempo pulses and sample packets;
  - spectra;
  - new and replayed windows;
  - the drum voice started by the crossing;
  - a patchboard change sent from the user I/O word;
  - that every left sample decoded from the AC'97 serial stream is one
    the effects produced.
- `tb_auralizer_top_full` runs the top with every parameter at its
  default. It plays two 1024×768 frames. The LED entering the box gives one
  tempo pulse, which yields one 2048-word sample and one 32,768-bin
  spectrum. That spectrum goes through one 65,536-point transform and one
  800-sample window, which the test hears on the AC'97 link. It takes
  about half a minute with Verilator.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/aural_pkg.sv rtl/pkt_bus.sv tb/tb_auralizer_top.sv \
    --top-module tb_auralizer_top
./obj_dir/Vtb_auralizer_top
```

Verilator is a two-state simulator. Every memory that is read before it
is written is therefore cleared after reset by a sweep, or initialised.
This applies to the sequencer's bin buffer, the filter table, the echo
line and the colour lists. Those sweeps take a few thousand clocks after
reset at the default sizes. The colour-list sweep is the longest, at
8192 clocks.
