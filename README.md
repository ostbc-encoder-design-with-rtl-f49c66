# A bit-error-rate tester for a 16-phase differential PSK link

This RTL measures how many bits a noisy link gets wrong. A sampled signal X
goes in at one end. It is cut into cycles of 16 samples, and only one thing
about each cycle is sent: how far its phase moved since the last cycle. That
phase step travels as an 8-bit word on a single serial line through a channel
that adds Gaussian noise. At the far end the phase steps are summed again, a
clean sine at the recovered phase is rebuilt as the signal Y, and every bit of
Y is compared with the matching bit of X. The bit error rate is `err_bits /
total_bits`.

The link is meant to carry an orthogonal space-time block code (OSTBC) over
several antennas, between the serial PSK line and the channel. That encoder
and its decoder are **not** in this RTL: their positions are ports of the top,
and the testbench closes the loop with a simple antipodal mapping instead.

```
 x_in ─► psk_mod ─► psk_bit ──►[ OSTBC encoder ]──► chan_in ─► noise_gen ─► chan_out ──►[ OSTBC decoder ]──► rx_bit ─► inv_psk ─► y_out (Y)
            │             (external)                              (external)                                     │
            └──── X cycle (64 bits) ─────────────────────────► ber_calc ◄──────────────── Y cycle (64 bits) ─────┘
```

## The PSK transmitter (`psk_mod`)

Four blocks make up the transmitter. A clock counter drives the other three:

| module       | in              | out                  | job |
|--------------|-----------------|----------------------|-----|
| `clkcounter` | clock           | slot number, strobes | numbers the 16 sample slots of a cycle and tells the others when to act |
| `tr`         | 4-bit sample    | 64-bit cycle         | collects 16 samples, one per clock, and hands the cycle on |
| `trm`        | 64-bit cycle    | 8-bit word           | finds the cycle's phase and encodes the change from the last cycle |
| `generator`  | 8-bit word      | 1 serial line        | sends the word MSB first, two clocks per bit |

### Slot schedule

Everything in the transmitter runs on the 16-slot schedule of `clkcounter`.
X must supply one sample per clock, without gaps, from reset on.

| slot | what happens at the clock edge ending the slot |
|------|------------------------------------------------|
| 0..15 | `tr` stores the incoming sample in position `slot` |
| 15 | `tr` copies the finished cycle, including this slot's sample, to `frame` |
| 0  | `trm` evaluates `frame` (`frame_valid` is high during this slot) |
| 1  | `generator` loads the word (`sym_valid` is high during this slot) |
| 3, 5, …, 15 | `generator` moves to the next bit |

So bit 7 of a cycle's word is on the line in slots 2 and 3 of the next cycle,
and bit 0 in slots 0 and 1 of the cycle after. The line is never idle once
the first word is out. `bit_strobe` marks the first clock of each bit and
`sym_start` marks the first clock of bit 7. The strobes for `trm` and
`generator` are held off until the first full cycle has been collected, so
the empty cycle present after reset never produces a word.

### Phase detection and the 8-bit word (`trm`)

The phase of a cycle is the index of the first sample, counting from 0, where
the signal rises through mid-scale: sample `i-1` is below 8 and sample `i` is
8 or more. The search wraps around, so a crossing between sample 15 and
sample 0 counts as phase 0. The result has the resolution of one sample, so
there are 16 phases 22.5° apart.

The word is the phase change modulo 16, written as a binary angle: 256 codes
per turn, so a step of one phase is 16 codes (`sym = diff << 4`). The low four
bits are always 0 when sent. They exist so the receiver can round: noise may
flip the low bits without changing the phase. The previous phase is 0 after
reset.

A cycle with no rising crossing, such as a flat or clipped signal, keeps the
previous phase. It sends a step of 0 and `found` goes low. If a cycle has
several crossings, the lowest index wins.

The reference waveform is `psk_pkg::sine16`:
`round(7.5 + 7.5·sin(2πk/16))` = 8, 10, 13, 14, 15, 14, 13, 10, 8, 5, 2, 1, 0,
1, 2, 5. Its only rising crossing of 8 is at k = 0. Shifting it by p samples
therefore gives a cycle that `trm` reads as phase p. A sine sampled this way
goes through the link without a single bit error when there is no noise.

## The channel (`noise_gen`)

`noise_gen` adds one noise value to each valid signed 8-bit sample and
saturates the result. The noise is built by the central-limit method. A 32-bit
xorshift generator (shifts 13, 17, 5) steps once per valid sample, its four
bytes are summed, and 510 is subtracted. This gives a bell-shaped distribution
on −510…+510 with standard deviation ≈ 147.8. The input `atten` (0–7) shifts
the noise right arithmetically, so each step lowers the noise power by 6 dB.
The latency is one clock. The sequence depends only on the seed (`SEED`) and
on how many samples have passed since reset.

## The receiver (`inv_psk`)

The receiver mirrors the transmitter:

1. A word starts at the bit that arrives with `rx_sym_start`. Bits that arrive
   outside a word are ignored, and a new start marker restarts the word.
2. After 8 bits the word is rounded to the nearest phase step: add 8, keep the
   top 4 bits. The step is then added to the accumulated phase.
3. The clean sine cycle at that phase goes out as a 64-bit `y_frame`, with a
   one-clock `y_frame_valid`, in the clock after the last bit. The same 16
   samples also go out one per clock on `y_out`/`y_valid`.

The phase is sent as a difference, so a word that is wrong in its top bits
shifts every later cycle of Y until another error happens to cancel it. This
is how differential PSK behaves, and it shows up directly in the BER. Over a
few hundred cycles, the BER of Y against X is therefore almost all or nothing:

| `atten` | noise σ vs. ±64 levels | wrong phase steps (of 298) | BER of Y vs. X |
|---------|------------------------|----------------------------|----------------|
| 0 | 148 | 256 | 0.49 |
| 1 | 74  | 207 | 0.50 |
| 2 | 37  | 59  | 0.49 |
| 3–7 | ≤ 18, peak ≤ 63 | 0 | 0 |

The table comes from `ber_sweep_tb`, with the bench's ±64 antipodal mapping
standing in for the space-time code. The noise is bounded: at `atten` ≥ 3 its
peak is below the signal level, so no error can occur. The count of wrong
phase steps is the better measure of channel quality.

## BER counting (`ber_calc`)

Transmitted cycles wait in a 4-deep queue. Each received cycle is matched with
the oldest one waiting, so the latency of the external encoder and decoder
does not need to be known. The only requirement is that no cycle is lost or
invented. For each match:

- `err_bits` grows by the number of differing bits (popcount of the XOR),
- `total_bits` grows by 64,
- `frames` grows by 1.

All three counters saturate. Two sticky flags report lost alignment:

- `ref_overflow`: a transmitted cycle found the queue full and was dropped.
- `rx_underflow`: a received cycle had nothing to match.

After either flag, the counts are no longer meaningful until reset.

A transmitted cycle that is not a clean sine (noise on X, a flat signal)
cannot be rebuilt exactly at the receiver. Its differences from the rebuilt
sine count as errors even on a perfect channel.

## Top level (`ostbc_bert_top`)

`ostbc_bert_top` wires the four parts as in the diagram. It brings out the
following signals for the missing OSTBC encoder and decoder:

| to / from | ports |
|-----------|-------|
| to the encoder | `psk_bit`, `psk_bit_strobe`, `psk_sym_start`, `psk_valid` |
| into the channel (from the encoder) | `chan_in`, `chan_in_valid`, `noise_atten` |
| out of the channel (to the decoder) | `chan_out`, `chan_out_valid` |
| from the decoder | `rx_bit`, `rx_bit_valid`, `rx_sym_start` |

Its other outputs are:

- Y: `y_out`, `y_valid`
- the BER counters and flags
- observation signals: `tx_sym`, `tx_found`, `tx_phase`, `rx_phase`, `chan_noise`

`chan_noise` is the last noise value added.

Parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `SAMPLES` | 16 | samples per cycle |
| `SAMPLE_W` | 4 | bits per sample |
| `SYM_W` | 8 | bits per PSK word |
| `CHAN_W` | 8 | channel sample width |
| `FIFO_DEPTH` | 4 | BER reference queue depth |

The waveform table fixes the receiver at 16 samples of 4 bits.

With the testbench's loop-back, the latency is 19 clocks. This is measured
from the edge that takes a cycle's last sample of X to the first sample of its
Y on `y_out`, with a channel of one clock. The BER counters include a cycle
from the same clock edge that puts the first sample of its Y on `y_out`.

Reset is synchronous and active low (`rst_n`) everywhere.

Generic synthesis of the whole top gives about 335 flip-flop bits and 313
word-level cells. It also gives 1344 ROM/RAM bits: the two waveform tables
(16×64 for whole cycles, 16×4 for single samples) and the 4×64 queue. Four output bits are constant by design: the low bits of
`tx_sym`.

## Where this follows its source and where it does not

The following come from the design this RTL is based on:

- the chain of blocks
- a clock counter driving `tr`, `trm` and `generator`
- 4-bit samples, 16 per cycle, collected into 64 bits
- an 8-bit word carrying the phase change since the last cycle
- one serial output line
- an additive white Gaussian noise channel
- an inverse PSK producing Y
- a BER taken between X and Y

Everything below is this design's own choice:

- **Phase detector**: the rising crossing of mid-scale, lowest index, with the
  previous phase kept when there is no crossing.
- **Word coding**: a binary angle (step × 16) with rounding at the receiver.
- **Line timing**: MSB first, two clocks per bit, with bit and word markers.
- **Slot schedule**: the order of strobes in `clkcounter`, and the start guard
  after reset.
- **Noise source**: the xorshift and four-byte sum, 8-bit samples, and
  saturation.
- **Receiver waveform**: the sine table above.
- **BER bookkeeping**: the matching queue, counter widths and flags. No divider
  is built; the ratio is read from the counters.

There are also departures from the source:

- **16 phases, not 4.** The system description calls for 4-PSK (four symbols
  90° apart), but the PSK module actually specified works on 16 time intervals
  per cycle and is shown as 16-PSK. This RTL uses 16 phases throughout.
- **No space-time coding.** The source proposes a new orthogonal code matrix
  for a 4×4 MIMO link but does not give its entries, so the encoder and
  decoder are left as ports. This RTL therefore measures the BER of a single
  PSK stream through one AWGN channel, not of a 4×4 MIMO system.
- **No device figures.** Slice and LUT counts and the clock rate of a
  particular FPGA are not reproduced or checked.

## Testbenches

Every module in `rtl/` has a self-checking bench in `tb/<module>_tb.sv`. Each
bench ends by printing `TB_RESULT checks=N failures=M`.

| bench | what it checks |
|-------|----------------|
| `clkcounter_tb` | slot number and every strobe against a model, including the start guard and 7 shifts per cycle |
| `tr_tb` | random samples give the right 64-bit cycle, one `frame_valid` pulse per cycle, and the cycle held while the next one is collected |
| `trm_tb` | sine cycles made with `$sin` at every phase step and at random, flat cycles, a double-crossing cycle, and the one-clock `sym_valid` |
| `generator_tb` | bit order, two-clock bit period, and the markers |
| `psk_mod_tb` | serial words against the expected steps, the `frame` output, and the two-edge start latency |
| `noise_gen_tb` | every output exactly, against a bench model of the generator (saturation included); then mean, standard deviation and bell shape over 20000 samples |
| `inv_psk_tb` | phase accumulation, rounding of damaged low bits, stray and aborted words, `y_frame`, and the `y_out` stream |
| `ber_calc_tb` | counts against the bench's sums under random traffic, simultaneous push and match, underflow and overflow |
| `ostbc_bert_top_tb` | end to end at default parameters (see below) |
| `ber_sweep_tb` | the whole link at every `atten` setting: zero errors where the noise cannot reach the signal, and fewer wrong phase steps at each step of less noise |

`ostbc_bert_top_tb` stands in for the encoder and decoder: it maps each line
bit to ±64 and decides by sign. The run has three phases:

1. **Weak noise**: Y must equal the expected sine cycle by cycle.
2. **Strong noise** (`atten` = 2): the BER counters are checked cycle by cycle
   against the bench's own popcount of X xor Y.
3. **Line cut**: the received line is cut for 6 cycles, so the reference queue
   overflows.

The bench fails unless each of these happened at least once:

- all 16 phase steps
- a phase wrap-around
- a cycle with no crossing
- a damaged word fixed by rounding
- a damaged word that moved the phase
- counted bit errors
- the overflow flag

It also checks that the X-to-Y latency is the same for every cycle.

To run a bench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/psk_pkg.sv tb/ostbc_bert_top_tb.sv --top-module ostbc_bert_top_tb
./obj_dir/Vostbc_bert_top_tb
```

Swap in another bench's file and module name to run it. Each bench finishes
in well under a second.
