# AudioSampler: a three-voice sample-playback synthesiser for the WM8731

One short recording, stored in FPGA block RAM, is played back at 31
different pitches by reading it at different speeds. Up to three keys can
sound at once. The voices are averaged, shaped by an attack/sustain/release
envelope and streamed as 16-bit, 48 kHz audio to a Wolfson WM8731 codec.
The codec is the one found on common FPGA development boards.

A host processor does everything that is not time-critical:

- it reads the USB-MIDI keyboard and turns each note into a number from 1 to 31;
- it loads the recording into the FPGA;
- it writes the held notes and the envelope rates into two registers.

The FPGA side (this RTL) does everything that happens at the sample rate.

```
 host (Avalon-MM agent, 16-bit words)
   |  0x0000-0x7FFF sample words      0x8000 keys      0x8800 envelope rates
   v                                     |                 |
 sample_bank  <--- addr x3 ---  playback <-- pitch_step x3 <-- key_hold <-- key_parser
 (3 copies)                       ^ frame tick (48 kHz)                       |
   | data x3                      |                                 pressed  |
   v                              |                                          v
 summer  ----------------->  asr_envelope  ----------->  serial_dac  ---> dacdat (I2S)
 (average of held voices)    (x amplitude / 2^16)         ^ bclk, daclrck from codec

 i2c_av_cfg -> i2c_master -> sclk / sda      (codec set-up after reset)
 mclk_div -> aud_xclk                        (12.5 MHz codec master clock)
```

Everything runs on one 50 MHz clock, `clk`. The top module is
`audio_sampler`.

## Pitch shifting by undersampling

Each voice has a read position, an unsigned fixed-point number with 16
integer and 16 fractional bits. On every audio frame the voice adds its
**step** to the position. The integer part addresses the sample table.

- A step of 1.0 replays the recording as stored.
- A step of 2.0 skips every other sample, which sounds one octave higher.
- Steps in between give the semitones.

Note number `k` (1..31) gets the step 2^((k-1)/12). Note 1 is the recording's
own pitch (G2 on the keyboard) and note 31 is 2.5 octaves above it (C#5).
`pitch_step` computes the step as follows. Let n = k - 1. Take one of twelve
equal-temperament ratios, chosen by n mod 12. Shift it left by n div 12
octaves. The twelve ratios are the six-decimal values 1, 1.059463, ...,
1.887749, scaled by 2^16 and rounded (`audio_pkg::SEMITONE_RATIO`). Note 0
means "no key" and gives a step of 0, so the voice stands still.

There is no interpolation and no anti-alias filtering. The output simply
takes every step-th sample, so high notes alias. That is inherent to the
method.

`playback` holds the three positions. They advance once per frame, on the
falling edge of the codec's DAC left/right clock. Positions wrap modulo the
table length, so a held note loops the recording. With board switch `sw[0]`
set, the step is subtracted instead and the recording loops backwards. A
frame whose update clock coincides with a host write (`chipselect && write`)
does not advance. That keeps the voices still while the host is reloading
the table.

## Why the table is stored three times

All three voices need a sample in the same frame, and block RAMs have at
most two ports. `sample_bank` therefore keeps three identical copies, one per
voice: 3 x 32768 x 16 bits = 1.5 Mbit (192 KiB). A host write updates all
three copies at once. Host read-back uses copy 0's read port. In a clock
with a host read, voice 0 keeps the word it read in the previous clock.
Voices re-read their address on every clock, so voice 0 is correct again one
clock later, long before the next frame.

## Mixing and envelope

`summer` adds the voices that have a key and divides by how many there
are: one key passes through, two give (a+b)/2, three give (a+b+c)/3. The
division truncates toward zero. The loudness of a chord therefore never
exceeds that of one voice. No key gives 0.

`key_hold` remembers the last non-empty key set. When all keys are lifted,
the voices keep playing that chord while the envelope fades it out.
`pressed`, the envelope's key input, is true when any live key is non-zero.

`asr_envelope` is a four-state machine: IDLE, ATTACK, SUSTAIN, RELEASE. A
classic ADSR envelope also has a decay stage; this one does not.

| from    | to      | when                                    |
|---------|---------|-----------------------------------------|
| IDLE    | ATTACK  | a key is pressed                        |
| ATTACK  | SUSTAIN | amplitude >= 0x7BFF (31743)             |
| ATTACK  | RELEASE | all keys lifted before the peak         |
| SUSTAIN | RELEASE | all keys lifted                         |
| RELEASE | IDLE    | amplitude <= 1024                       |
| RELEASE | ATTACK  | a key pressed again (from current level)|

The amplitude changes only on an envelope tick, once every 5001 clocks
(about 10 kHz). On each tick it rises by the attack rate during ATTACK and
falls by the release rate during RELEASE. In SUSTAIN it is held at 0x7BFF,
and in IDLE it is 0.

Both rates are 8 bits and are written together to 0x8800. They reset to
attack 64 and release 32. With those values a full attack lasts
496 ticks (about 50 ms), and a release from the peak lasts 960 ticks (about
96 ms). The output is `(amplitude * sample) >>> 16`, so the peak level is
about -6 dB of full scale.

## Host register map (Avalon-MM agent)

The address is a 16-bit word address and the data are 16 bits wide. A byte
master at a base address B reaches word `a` at byte address B + 2a.

| word address    | access | contents                                                   |
|-----------------|--------|------------------------------------------------------------|
| 0x0000-0x7FFF   | R/W    | sample table, signed 16-bit; writes go to all three copies |
| 0x8000          | W      | keys: [4:0] voice 1, [9:5] voice 2, [14:10] voice 3; 0 = off |
| 0x8800          | W      | envelope: [7:0] attack rate, [15:8] release rate           |

- Reads return data one clock after the request. There is no waitrequest.
- Writes to other addresses are ignored.
- An assertion checks that `read` and `write` are never asserted together.

## Codec interface

**Audio (I2S, codec is the master).** The set-up below puts the codec in
master mode. The codec therefore drives `bclk` and `daclrck`, with
`daclrck` low for the left channel.

`serial_dac` does not use these signals as clocks. It passes them through
two-flop synchronisers and detects their edges in the `clk` domain. One bit
goes out per `bclk` falling edge, about three `clk` periods late. That is
well inside the half bit period of roughly 160 ns.

Each slot carries `{0, sample[15:0], 0...}`: the I2S one-bit delay, then the
sample MSB first, then zero padding. Both channels carry the same sample.
The sample is captured once per frame, at the start of the left slot. That
same moment produces `frame_tick`, which advances the voices. The result is
one frame of latency from positions to audio.

`clk` must be several times faster than `bclk`. At 50 MHz against about
3 MHz, it is.

**Control (two-wire bus).** After reset, or when `swt` is raised,
`i2c_av_cfg` sends ten register words to device address 0x34:

| word   | codec setting |
|--------|---------------|
| 0x001A, 0x021A | line-in levels |
| 0x0479, 0x0679 | headphone volume |
| 0x0810 | analogue path: DAC on, bypass off |
| 0x0A06 | digital path |
| 0x0C00 | power up everything |
| 0x0E42 | master mode, I2S, 16 bit |
| 0x1000 | normal mode, 48 kHz |
| 0x1201 | activate |

If the codec does not acknowledge a word, that word is sent again.
`config_done` rises after the tenth acknowledged word.

`i2c_master` sends each word as START, three bytes with acknowledge bits,
then STOP. Each bit takes four steps (SCL low, high, high, low). One step
is 2 x (CLK_FREQ / I2C_FREQ + 1) = 2502 clocks, so SCL runs at about 5 kHz
and the whole set-up takes about 60 ms. The data line is split into
`sda_o`, `sda_oe` and `sda_i`. On the board, drive the pin low when
`sda_oe && !sda_o` and release it otherwise (open drain with a pull-up).

`mclk_div` supplies the codec master clock, `aud_xclk` = clk / 4 =
12.5 MHz. The codec's nominal master clock is 12.288 MHz, so the sample rate
comes out about 1.7 % high (about 48.8 kHz).

## Top-level ports of `audio_sampler`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, reset | in | 1 | 50 MHz clock, synchronous active-high reset (the sample RAM is not cleared) |
| address, chipselect, read, write, writedata, readdata | | 16/1/1/1/16/16 | Avalon-MM agent |
| aud_xclk | out | 1 | codec master clock |
| bclk, daclrck | in | 1 | codec bit and DAC frame clocks |
| dacdat | out | 1 | I2S data |
| adclrck, adcdat | in | 1 | codec ADC side, only mirrored on gpio |
| sclk, sda_o, sda_oe, sda_i | | 1 | two-wire control bus |
| swt | in | 1 | low holds the codec interface (set-up and serialiser) in reset |
| sw | in | 10 | sw[0] = reverse playback |
| gpio | out | 8 | {write, chipselect, adclrck, adcdat, daclrck, dacdat, bclk, aud_xclk} for a logic analyser |

Parameters: `DEPTH` (32768), `ENV_TICK` (5001), `CLK_FREQ` (50 000 000),
`I2C_FREQ` (40 000).

## How far this follows the original design, and where it departs

The following are taken from the original project:

- the block structure;
- the register map;
- the table size and the three copies;
- the 16.16 steps and the semitone ratios;
- the averaging summer;
- the envelope states, levels, rates and tick;
- the I2S slot layout;
- the codec set-up words;
- the two-wire timing;
- the divide-by-four master clock.

The following are this implementation's own choices:

- **One clock domain.** The original clocks the serialiser on the bit clock
  and the address generators on the frame clock. Here both are synchronised
  into `clk`.
- **Modular wrap.** The original restarts forward playback at 0 when it
  reaches the last word. In reverse it jumps to word 32767 when it reaches
  word 0. Here the position simply wraps, which keeps the fractional phase.
- **Steps computed from 12 ratios** rather than a 31-entry constant list.
  The results agree to within a few units of 2^-16.
- **Address decode.** Sample writes are limited to addresses below 0x8000.
  The original also wrote the key and envelope words into the table.
- **Summer with no keys** outputs 0. The original averaged all three voices,
  which is inaudible because the envelope is idle then.
- **Two-wire acknowledge.** It is sampled while SCL is high, with SDA
  released for the whole acknowledge bit. The master and the sequencer talk
  through a start/done pulse pair.
- **Resets** on every register. Read latency is one clock. The serialiser
  latches the sample once per frame.
- **Not provided:** the board's `led_op` outputs, which the original never
  drove. The host software, the bus fabric and the codec itself are outside
  this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module's outputs with values computed independently in the testbench and
prints `TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|-----------|---------------------|
| tb_pitch_step | all 32 steps within 2 LSB of 2^((k-1)/12)*65536; exact octaves; key 16 within 1 LSB of 0x260DF, a step measured on hardware |
| tb_key_parser | fields decoded only on writes to 0x8000 |
| tb_key_hold | held set and `pressed` under random key traffic |
| tb_sample_bank | all copies written, one-clock latency, voice 0 held during host read |
| tb_playback | positions against an integer model, forward, reverse, hold, wrap |
| tb_summer | truncated average for 0-3 voices including full-scale inputs |
| tb_asr_envelope | attack/release tick counts, sustain level, scaling, re-press, rate register |
| tb_serial_dac | I2S words decoded by the codec model, delay bit, 64 bit clocks per frame |
| tb_i2c_master | bytes on the wire, acknowledge/no-acknowledge, transfer duration |
| tb_i2c_av_cfg | the ten set-up words in order, retry after a refusal |
| tb_mclk_div | period 4, 50 % duty |
| tb_audio_sampler | whole design at full size (below) |

`tb_audio_sampler` runs the top with every parameter at its default.

- **Load.** It loads all 32768 words and reads part of them back.
- **Playing.** It plays a three-note chord, a two-note chord, a single note
  with a non-integer step (forward, then reverse), each of the 31 notes in
  turn, host writes on a frame boundary, a rate change, a release, and a re-press during the release.
- **Per-frame checks.** Every frame decoded by the codec model must equal
  floor(amplitude x average / 2^16). The average is computed from the
  testbench's own copy of the table. Every voice must advance by its step
  once per frame.
- **Codec set-up.** The codec model must receive the ten set-up words. It
  refuses the first attempt, so the retry is exercised.
- **Coverage.** The testbench counts each mechanism: 1/2/3-voice mixing,
  each envelope state, release tail, re-attack, reverse, wrap, host hold,
  fractional steps and set-up retry. It fails if any count is zero.

It simulates about 10 million clocks in a few seconds.

`tb/wm8731_model.sv` is a behavioural model of the codec's two digital
interfaces. It generates the I2S clocks from `aud_xclk`, decodes the data,
and acts as a two-wire slave that logs register writes. It can refuse the
first N transfers.

## Simulating

With Verilator 5, name the package and the testbench. Verilator finds
every other module through the library paths, one module per file:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/audio_pkg.sv tb/tb_audio_sampler.sv --top-module tb_audio_sampler
./obj_dir/Vtb_audio_sampler
```

Any block testbench works the same way. Replace `tb_audio_sampler` with
`tb_<block>`.

Block testbenches shorten the slow parts by overriding parameters: a
10-clock envelope tick, a 10-clock two-wire step, and a 256- or 1024-word
table.

## Files

- `rtl/audio_pkg.sv`: shared types (`key_t`, `sample_t`, `step_t`,
  `env_state_t`), the register addresses, the semitone ratios and the
  envelope constants.
- `rtl/audio_sampler.sv`: the top.
- `rtl/<block>.sv`: one module per block.
- `tb/tb_<block>.sv`: the testbenches.
- `tb/wm8731_model.sv`: the codec model.
