# Digital IF AM/FM car-radio receiver: the hardware around the DSP

A car radio that digitises the tuner's 10.7 MHz IF directly and does everything after that in
logic: mixing to zero IF, channel filtering, FM/AM detection, stereo decoding and RDS. A 24-bit
DSP runs the parts that are software: a blind channel equaliser and the weak-signal
processing. This RTL is the dedicated hardware of such a receiver. It takes the 33-level
output of a band-pass sigma-delta ADC clocked at 37.05 MHz and delivers:

- stereo audio at 48.24 kHz on an I2S-style serial port;
- decoded, error-corrected RDS groups on an SPI control port.

It also has the DSP's peripherals and its data-path pieces:

- an AM/FM detector shared with software;
- serial audio with an asynchronous sample-rate converter, and a high-speed serial link;
- a clock unit;
- the multiply-accumulate unit, the address generator, the program-address history and the
  memories.

Everything runs from a single 74.1 MHz master clock. The clock has no PLL: every rate is this
clock divided down, and slower blocks use clock-enable strobes.

```
ADC code (37.05 MHz) -> DDC -> I/Q 289.45 kHz, 24 bit -+-> [DSP equaliser, external] -+
                                                        +-------- bypass ------------+-> FM detector (core 0) -> MPX
                                                                                     +-> AM detector (core 1) -> field strength
MPX -> stereo decoder -> L/R 48.24 kHz -> SAI0
MPX + pilot phase -> RDS demodulator -> bits -> RDS decoder -> blocks/groups -> SPI status
```

## Rates and number formats

| Point | Rate | Format |
|---|---|---|
| ADC code | 37.05 MHz (`adc_en`, every 2nd clock) | signed 6 bit, -16..+16 |
| Mixer output | 37.05 MHz | 20 bit, 12 fraction bits; CORDIC gain 1.647 kept |
| Sinc (CIC) output | 1.158 MHz (/32) | top 24 of 45 bits |
| FIR1 output | 578.9 kHz (/2) | 24 bit |
| FIR2 output, I/Q | 289.45 kHz (/2) | 24 bit; about 1.65 x 2^16 per ADC step |
| Angles | - | unsigned fraction of a turn, 2^24 = 360 degrees |
| MPX (FM detector) | 289.45 kHz | phase step per sample: 2^24 = 289.45 kHz deviation (about 58 per Hz) |
| Audio | 48.24 kHz (/6) | signed 24 bit |
| RDS | 1187.5 bit/s | one bit per 62 400 clocks |

Shared constants and types live in `radio_pkg`. These include:

- the filter coefficient sets;
- the CORDIC arctangent table;
- the 10.7 MHz tuning word: 4845242 = 10.7/37.05 x 2^24;
- the 19 kHz pilot word: 1101286 = 19/289.45 x 2^24;
- the de-emphasis coefficients;
- the enums of the detector modes and of the DSP units;
- a small sine approximation: a parabola with a 0.225 correction, peak error about 0.1 %.

## Down-conversion (`ddc`)

**Stages.** The DDC is four stages on I and Q:

1. `phase_gen` adds the 24-bit frequency word once per ADC sample. The word comes from control
   register 0 and defaults to 10.7 MHz.
2. `cordic_rotator` rotates the real sample by minus that phase. It is a fully pipelined CORDIC:
   a 180-degree pre-rotation folds the angle into +-90 degrees, then 18 shift-and-add stages
   follow, with a latency of 19 clocks. This gives cos/sin mixing without multipliers or a
   sine table.
3. `cic_decim` is a 5th-order Hogenauer Sinc decimator by 32, with 45-bit registers so nothing
   wraps. It keeps the top 24 bits.
4. `fir_decim` is used twice. Each is a serial FIR: a circular buffer of the inputs and one
   multiply-accumulate per clock. After each second input it computes one output, rounded to
   nearest and saturated.
   - FIR1 has 21 taps and flattens the Sinc droop up to 150 kHz.
   - FIR2 has 63 taps and is the channel filter: 120 kHz pass band, 160 kHz stop band, so
     about 300 kHz two-sided.

   The coefficients are 18-bit with 17 fraction bits and unity DC gain. They were designed with a
   least-squares fit (FIR1) and the Parks-McClellan method (FIR2), then rounded.

The stages run one after another at falling rates. Each FIR has 128 clocks for 21 or 63
products, so a single MAC is enough. An assertion in `fir_decim` checks that no input arrives
while the filter is still busy. `ddc` checks that I and Q leave in the same clock.

**Tuning.** The frequency word tunes anywhere in the 0..18.5 MHz alias band. The end-to-end test
tunes to 10.8 MHz and reads the word back.

## AM/FM detector (`amfm_detector`, `cordic_vectoring`)

The detector has four independent cores. Each is a **serial** vectoring CORDIC: one adder set and
one micro-rotation per clock. A request loads I/Q and sets the mode:

- **AM:** the magnitude, with the CORDIC gain removed by a Q16 constant.
- **PM:** the phase.
- **FM:** the phase step since the same core's previous request. It wraps, so a step of
  +-0.5 turn is the largest that can be told apart.

The result comes 27 clocks after the request. To keep the phase good to about 2 LSB of 24 bits,
the datapath carries 6 guard bits below the input LSB.

The cores are allocated as follows:

- Core 0 does FM on the channel and feeds the stereo decoder and RDS.
- Core 1 does AM on the same samples. Its magnitude is the field-strength input.
- Cores 2 and 3 serve requests from the DSP.

## Stereo decoder (`stereo_decoder`)

The decoder works at 289.45 kHz on the MPX signal

    MPX = M + p sin(th) + S sin(2 th) + RDS(57 kHz),   M = (L+R)/2, S = (L-R)/2

**Pilot PLL.** An NCO centred on 19 kHz produces th.

- The phase detector is MPX x cos(th_nco). It passes two first-order low-passes
  (alpha 2^-7, about 360 Hz each), which remove the audio and the 38 kHz products before the
  loop filter.
- The loop filter is proportional-integral with gains 2^-6 and 2^-17.
- Lock takes a few ms: stereo is on 2 ms after reset in the end-to-end test.
- The NCO phase is an output: RDS uses it to make its 57 kHz carrier (3 th). This makes the RDS
  carrier phase-coherent with the pilot, as the broadcast standard ties them.

**Pilot detection.** MPX x sin(th_nco), through two first-order low-passes of alpha 2^-8, is the
pilot amplitude.

- Stereo switches on above 60 000 and off below 40 000. A nominal 7.5 kHz-deviation pilot gives
  about 216 000.
- The second low-pass matters. With only one, the residue of the audio and the unlocked beat
  made the flag chatter while the loop acquired.

**Matrix and filtering.** S is demodulated as 2 MPX sin(2 th).

- M and S each pass a 127-tap equiripple low-pass: 14 kHz pass, 19 kHz stop, -52 dB. The same
  `fir_decim` decimates by 6 to 48.24 kHz.
- S is then multiplied by `blend` (Q8; 256 = full separation, 0 = mono). It is forced to zero
  when the pilot is absent or the DSP sets `force_mono`.
- L = M + S and R = M - S.

**Audio controls.** After the matrix each channel passes two first-order low-passes (`iir1`)
and a gain:

- the high-cut low-pass, whose Q16 coefficient comes from the DSP;
- the de-emphasis: 50 us or 75 us, alpha = 1 - exp(-1/(fs tau));
- the soft-mute gain (Q8).

The field-strength output is a first-order low-pass of the AM magnitude.

**The DSP's part.** The DSP reads the pilot level and the field strength. It decides blend,
high-cut and mute, and writes them back. These are plain registers here: the control law is
software.

**Input spacing.** Samples must be at least 129 clocks apart, because the 127-tap filters are
serial. The normal spacing is 256.

## RDS (`rds_demod`, `rds_decoder`)

RDS is BPSK on a 57 kHz subcarrier, biphase (Manchester) coded and differentially coded, at
1187.5 bit/s. That is exactly 48 periods of the 57 kHz carrier per bit.

### Demodulator

1. **Mixing.** MPX is multiplied by cos and sin of 3 x the pilot phase. Two first-order
   low-passes of alpha 1/8 on each branch remove the audio that the mixing folds near DC; the
   main product of that is M at 57 kHz +- 15 kHz.
   - The I branch carries the data.
   - The Q branch should be empty if the pilot is locked. It is kept for the quality measure.
2. **Bit clock.** A 24-bit NCO steps by 68 831 per sample: 1187.5 / 289.45 kHz x 2^24. The
   low-passed I signal is integrated over each quarter of the bit.
   - A biphase symbol is +a in the first half and -a in the second. So (q0 + q1) - (q2 + q3) is
     the symbol.
   - The sign of the symbol times the middle quarters (q1 - q2) says whether the clock is early
     or late.
   - The NCO is nudged by 32 768, 1/512 of a bit, once per bit. The nudge is applied during the
     second quarter, after the bit-end decision, so it can never move the clock back across the
     bit boundary.
3. **Half-bit lock.** Biphase has a second, false lock point half a bit away. There the
   half-boundary integrals look like random data. The demodulator keeps two running averages:
   the magnitude of the symbols as clocked, and of the same sums shifted by half a bit. If the
   shifted one is more than 1.5x larger, it jumps half a bit.
4. **Decision.** The bit is the sign of the symbol. The differential decoding is
   bit(n) XOR bit(n-1).
5. **Quality.** The average symbol magnitude, a measure of signal-to-noise.

### Decoder

**Code.** The RDS code is a (26,16) shortened cyclic code. Generator:

    g(x) = x^10 + x^8 + x^7 + x^5 + x^4 + x^3 + 1   (0x5B9)

Each 26-bit block carries 16 data bits and a 10-bit check word. The check word is XORed with an
offset word that marks the block's position: A 0FC, B 198, C 168, C' 350, D 1B4. The syndrome of
the last 26 bits is computed bit-serially as each bit arrives.

**Search.** The syndrome is compared with the five offset syndromes at every bit. A match starts
a candidate.

**Sync.** Sync is declared when a second block 26 bits later has the next offset in the
sequence. From then on only every 26th bit is evaluated.

**Correction.** When a synced block's syndrome is not the expected offset, the decoder searches
the error patterns: every burst of up to 5 bits, at every position. That is 416 candidates. The
search is one per clock, sequential, with the syndromes generated incrementally. A match
corrects the data bits.

- This catches all the error patterns the code is designed to correct.
- Bits must arrive at least 418 clocks apart. The real spacing is 62 400.

**Block status.** Every block is reported with its type, its data and a status: 0 error-free,
1 corrected, 2 uncorrectable.

**Flywheel.** Sync is dropped only after more than 8 uncorrectable blocks in a row. Only an
error-free block resets that count, not a corrected one. The reason: a random 26-bit word often
looks correctable, which would otherwise keep a lost sync alive forever.

**Groups.** A group (A, B, C or C', D) is stored and flagged only when all four blocks arrived in
order and none was uncorrectable. The host then reads whole groups instead of polling every
block.

## Control and data interfaces

### SPI control port (`spi_ctrl`)

The port is SPI mode 0, MSB first. It is sampled in the master-clock domain, so SCLK must be
at most about 12 MHz. A transfer is an 8-bit command {write, address[6:0]} followed by 24 data
bits. A read returns the addressed word during the data phase.

| Address | Register |
|---|---|
| 0 | DDC frequency word (reset: 10.7 MHz) |
| 1 | bit 0 force mono, 1 de-emphasis 75 us, 2 equaliser bypass (reset 1), 3 SAI0 master, 4 SAI1 master, 5 HS3I enable, 8:6 HS3I clock high time, 9 SAI1 fed through the ASRC |
| 2 | stereo blend, Q8 (reset 256) |
| 3 | high-cut coefficient, Q16 (reset 65536 = off) |
| 4 | soft-mute gain, Q8 (reset 256) |
| 5..8 | CGU divider k: bits 11:0 ratio, 23:12 phase of the strobe |
| 9 | oscillator trim: writing bit 0 steps up, bit 1 steps down |
| 10 | AGC DAC code (8 bit) |
| 16..19 | last complete RDS group, blocks A, B, C/C', D |
| 20 | bits 2:0 last block type, 4:3 its status, 5 stereo, 6 RDS synced, 7 new group (a write to 20 clears it), 8 ASRC locked |
| 21 | pilot level |
| 22 | field strength |
| 23 | oscillator trim code |
| 24 | RDS quality |
| 25 | ASRC input-period estimate, 2^24 / clocks per input sample |

### Serial audio (`sai`, two instances)

Each SAI has a transmit and a receive channel, and can be master or slave.

- The frame is I2S: two 32-bit slots, 24-bit words MSB-first, starting one bit clock after the
  word-select edge.
- As master the SAI makes the bit clock as 74.1 MHz / 24 = 3.0875 MHz. With 64 bit clocks per
  frame that gives exactly one 48.24 kHz frame per audio sample.
- As slave it follows clocks from the pins, synchronised to the master clock.
- SAI0 transmits the stereo decoder's output. SAI1 transmits words from the DSP, either as
  they are or through the ASRC (register 1 bit 9).
- Both deliver received frames to the DSP.

### Sample-rate converter (`asrc`)

The ASRC lets the DSP deliver audio at its own rate, for example 44.1 kHz, while SAI1 takes
frames at 48.24 kHz or at an external master's rate. Neither rate is programmed. A
second-order digital ratio-locked loop measures the input rate against the 74.1 MHz clock.

- **The loop.** A phase accumulator `p` counts input periods in units of 2^-24. Each master
  clock adds `step`, the estimated period as 2^24 / (clocks per input sample). When a sample
  arrives, `p` should be exactly 1.0; the error `e = p - 1` is the timing error.
  - The phase is corrected by `e/4`: the proportional path.
  - `step` is corrected by `e/4096`: the integral path. With no jitter this path drives `e` to zero.
  - The arrival jitter of the input is filtered by the same gains, so a few clocks of jitter
    do not reach the output.
- **Interpolation.** Between arrivals, `p` (limited to 0..1) is how far the output time is
  past the last input, measured in input periods. When SAI1 asks for a sample, the ASRC
  returns the straight line between the last two inputs at that point. The output is the
  input delayed by one input period. With linear interpolation, the error for a 1 kHz tone
  at 44 kHz is below 0.3 % of full scale. Tones near 20 kHz are attenuated and aliased much
  more; a polyphase filter would be needed for that and is not built.
- **Lock and recovery.**
  - The lock flag is set after 16 inputs in a row with the error below 1/64 period.
  - It is cleared by an error above 1/16 period.
  - An error of more than half a period restarts the phase. This happens at start-up, after
    a gap in the input, or after a jump in rate. Each integral correction is limited to a
    quarter period, so a new rate is found within some tens of samples.
  - `step` is kept between 2^-14 and 2^-8, that is between 256 and 16384 clocks per input.
- **Timing.** The ASRC answers a request one clock later. SAI1 asks once per frame.

### HS3I (`hs3i`)

HS3I is a high-speed synchronous link: 24-bit words with a frame-sync pulse, at
74.1 MHz / 8 = 9.26 Mbit/s.

- The clock's high time is programmable from 1 to 7 of the 8 master clocks. This is the
  duty-cycle control, used to move clock harmonics out of band.
- The receiver samples on the rising edge of the incoming clock. The end-to-end test loops the
  pins back.

### Clock unit (`cgu`)

The clock unit produces:

- the ADC strobe, master clock / 2;
- four clock-enable strobes, each with a programmable ratio and a programmable position inside
  the period (the "phase relation");
- an 8-bit oscillator trim code, stepped up and down by the DSP and reset to mid-scale. One step
  is about 80 Hz on FM and 250 Hz on AM, as set by the analog oscillator.

## DSP-side hardware

**Data ALU (`dsp_mac`).** A 24 x 24-bit fractional multiplier with a 56-bit accumulator:
8 integer guard bits, 48 fraction bits.

- Operations: clear, multiply, multiply-negate, accumulate, subtract, load, and
  accumulate-after-24-bit-shift. The last one, with the signed x unsigned and unsigned x
  unsigned operand modes, builds 48 x 48-bit products in four steps.
- The operands are Q23 fractions, and the product is shifted left by one.
- In saturation mode the accumulator is clamped to the 48-bit range after each operation.
- The 24-bit output word is the accumulator scaled by 1, 1/2 or 2, rounded, and limited to the
  24-bit range when the extension bits are in use.
- It flags limiting and a 56-bit overflow.

**Address generator (`dsp_agu`).** Eight pointers, each with an offset and a modifier. Two of
them can be updated per clock. Update modes:

- linear: +-1 or +-offset;
- modulo M, a circular buffer whose base is aligned to the next power of two;
- reverse-carry, for FFT bit-reversed addressing.

**Program address history (`pa_history`).** The last 5 executed program addresses, newest
first, frozen while the debugger halts.

**Memories (`sp_ram`).** Single-port synchronous RAMs:

- program RAM: 4096 x 24 bit = 12 kbyte;
- X and Y data RAMs: 3072 x 24 bit each, 18 kbyte together.

## What is not here

The design is the digital hardware only. The following are left out or reduced, and the top
brings out ports where they would connect:

- **ADC, crystal oscillator and AGC DAC.** These are analog. The top takes the 33-level ADC code
  and gives out the trim code and the 8-bit AGC code.
- **The DSP core itself.** Its instruction set, pipeline, DO-loop and interrupt stacks, and the
  serial debug port are not specified well enough to build. Its data ALU, address generator,
  address history and memories are built and brought out on `dsp_*` ports. The 6 kbyte boot ROM
  is not built: its contents are unknown.
- **Channel equaliser and weak-signal processing.** These are DSP software.
  - The bypass bit in register 1 chooses between the DDC output and I/Q returned by the DSP on
    `dsp_eq_*`.
  - Spike blanking and the field-strength-to-blend/mute control laws are software. They act
    through registers 2..4.
- **I2C.** Only the SPI form of the control port is built, and not the boot-load use of it.
- **Self-trimming of the oscillator bias.** Only the DSP-driven trim register is built.
- **Chosen here rather than published.** All filter coefficients, loop gains, thresholds, widths
  other than the 24-bit I/Q and audio, the register map and the serial frame formats.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. The expected values are computed in the
testbench from real-valued models. For example:

- a floating-point CIC and FIR;
- `$atan2` and `$sqrt` for the CORDICs;
- a software RDS encoder with injected bursts for the decoder;
- an I2S decoder for the SAI.

`tb_radio_top` runs the whole receiver at its default sizes. It synthesises a 10.8 MHz FM IF as
the ADC would see it: a 33-level quantised cosine with dither, FM-modulated by an MPX. The MPX
is a 1 kHz left-only tone at 67.5 kHz deviation, the pilot at 7.5 kHz and RDS at 3 kHz. The RDS
carries fixed groups with one channel-bit error in block C of every group. The test then:

1. tunes the DDC over SPI;
2. waits for stereo, RDS sync and two complete groups, which takes about 260 ms of signal;
3. reads a group back over SPI;
4. measures the separation and the audio rate;
5. decodes SAI0's I2S stream and compares it with the audio;
6. checks blend, the equaliser path through the DSP port, forced mono and the loss of the pilot;
7. exercises the DSP-side blocks once: detector cores 2 and 3, the MAC, an AGU modulo wrap, the
   three RAMs, the address history, an HS3I loop-back word, SAI1 as a slave, a CGU divider, the
   trim and the AGC code;
8. switches SAI1 to the ASRC, feeds it a 1 kHz tone at about 44.08 kHz (one sample every 1681
   master clocks), and checks lock, the rate estimate and the smoothness of the 48.24 kHz
   output on the SAI1 pin.

Each mechanism is counted, and one that never happened is a failure. The test simulates about
0.3 s of radio time in about 45 s of verilator time.

To run one testbench with plain verilator:

    verilator --binary --timing --assert rtl/radio_pkg.sv -y rtl -y tb \
              tb/tb_radio_top.sv --top-module tb_radio_top -o sim
    obj_dir/sim

The block testbenches run in seconds. `tb_stereo_decoder` (pilot lock, separation, blend,
de-emphasis, mute) takes about 5 s.

## Files

- `rtl/radio_pkg.sv`: shared constants, coefficient tables, types.
- `rtl/radio_top.sv`: the top, with the register map.
- DDC: `rtl/phase_gen.sv`, `cordic_rotator.sv`, `cic_decim.sv`, `fir_decim.sv`, `ddc.sv`.
- Detector: `rtl/cordic_vectoring.sv`, `amfm_detector.sv`.
- Audio: `rtl/stereo_decoder.sv`, `iir1.sv`.
- RDS: `rtl/rds_demod.sv`, `rds_decoder.sv`.
- Interfaces: `rtl/sai.sv`, `asrc.sv`, `hs3i.sv`, `spi_ctrl.sv`, `cgu.sv`.
- DSP side: `rtl/dsp_mac.sv`, `dsp_agu.sv`, `pa_history.sv`, `sp_ram.sv`.
- `tb/tb_*.sv`: one testbench per module, plus `tb_radio_top.sv`.
