# Rate 1/2 convolutionally coded link over an AWGN channel, in SystemVerilog

This design is a hardware model of a complete coded baseband link: random
data bits are encoded by the classic rate 1/2, constraint length K = 3
convolutional code with generators 7 and 5 (octal), mapped to antipodal
levels, corrupted by additive white Gaussian noise of a chosen strength,
quantized to three-bit soft decisions, and finally compared bit by bit with
what a decoder makes of them. Its purpose is the one such a chain always
has: measuring how many bit errors a forward error correction scheme leaves at
a given signal-to-noise ratio, here at clock speed instead of in software.

The Viterbi decoder itself is **not** included. The quantized symbols leave
the top module on ports, and the decoder's bits come back on ports, so any
decoder with a bit-serial output can be placed in the loop and measured.

```
                                      ebn0 --> snr_to_sigma --sigma--+---------------D------+
                                                                     v                      v
 data_source --> conv_encoder --> symbol_mapper --> awgn_channel --> soft_quantizer --> q_* ports
  (random      (shift register,   (y = 1 - 2x)     (+ sigma*G or       (3-bit soft,         |
   bits)        2 XOR trees,                         sigma*H)           hard = MSB)          v
      |         SEL A/B, flush)                                                         external decoder
      |                                                                                      |
      +--------------- bits taken by the encoder ---> error_counter <--- dec_valid/dec_bit --+
```

Everything runs on one clock. The channel carries one symbol per clock, so
the data rate is one bit per two clocks.

## The encoder

`conv_encoder` has a shift register of K-1 = 2 flip-flops. The current input
bit and the two stored bits form a 3-bit window `{u, s1, s0}`, where `s1` is
the previous bit and `s0` the one before it. Two modulo-two adders (XOR trees)
make the channel symbols:

| adder | generator | symbol |
|-------|-----------|--------|
| upper (A) | 7 = 111b | u ^ s1 ^ s0 |
| lower (B) | 5 = 101b | u ^ s0 |

The generator's most significant bit taps the current input. After each bit
the register shifts: `u` enters `s1`, and `s1` moves to `s0`. The register
value `{s1, s0}` is the encoder state, which gives these two tables:

| state | next, u=0 | next, u=1 | symbols, u=0 | symbols, u=1 |
|-------|-----------|-----------|--------------|--------------|
| 00 | 00 | 10 | 00 | 11 |
| 01 | 00 | 10 | 11 | 00 |
| 10 | 01 | 11 | 10 | 01 |
| 11 | 01 | 11 | 01 | 10 |

Each input bit affects three successive symbol pairs. This is where the
code's error-correcting power comes from.

**Output selector.** The SEL A/B selector sends the upper adder's symbol
first, then the lower one's. A data bit is accepted (`in_valid && in_ready`)
while the previous bit's B symbol is on the output, or when the encoder is
idle. Its A symbol appears on `sym` one cycle later and its B symbol the cycle
after that. `sym_sel` tells which one is on the output. With a steady input
the symbols form an unbroken stream, one per clock.

**Bursts.** A burst must start and end in a known state:

- `clear` sets the register to 00.
- The bit accepted with `in_last` is followed by K-1 = 2 zero bits that the
  encoder makes itself (`flushing` is high and `in_ready` low meanwhile).
- These flush bits give the last data bits their full three symbol pairs and
  bring the register back to 00.
- `sym_last` marks the final B symbol.

A burst of n bits therefore gives 2(n+2) symbols.

Worked example:

- Data: 010111001010001.
- Symbols: 00 11 10 00 01 10 01 11 11 10 00 10 11 00 11 10 11.
- The last two pairs come from flushing.
- The burst takes 34 consecutive clocks.

`K`, `G_UPPER` and `G_LOWER` are parameters, but the encoder always has two
adders: it only makes rate 1/2 codes.

## Noise generation

`gaussian_noise_gen` turns uniform random numbers into Gaussian ones through
the Rayleigh distribution:

```
R = sqrt(2 ln(1/(1-U)))          U uniform on (0,1)   -> Rayleigh, unit sigma
G = R cos(2 pi V),  H = R sin(2 pi V)   V uniform      -> two independent N(0,1)
```

The uniform source is a 32-bit xorshift generator (`uniform_rng`). U is bits
31..22 of its word and V is bits 21..12. Each 10-bit field addresses a
1024-entry table:

- `RTAB[i] = sqrt(2 ln(1/(1-u)))`, with 10 fractional bits, for
  u = (i+0.5)/1024.
- `COSTAB[i] = cos(2 pi v)`, with 10 fractional bits, for the same cell
  centres.
- sin is read from the cosine table a quarter turn earlier (index - 256).

Both tables are computed at elaboration by constant functions from these
formulas. No data file is involved, and they synthesize to constant ROMs.
`TAB_BITS` sets their size.

A draw stores the unit-variance pair `R cos`, `R sin`. Scaling by `sigma`
happens after that register, so a new `sigma` applies in the very next
symbol. A fresh pair is drawn with `next`, and one pair is drawn by itself
after reset.

Limits of this generator:

- Because U is quantized to 1024 cell centres, R never exceeds 3.90. The
  Gaussian tail beyond 3.9 sigma is missing.
- The measured variance is 0.994 instead of 1. This matters only when
  measuring error rates below about 1e-4 per symbol.
- Mean and correlation between G and H are zero to within 0.01 over 40,000
  samples.
- A larger `TAB_BITS` pushes the tail cut out, up to 16 bits per field.

## The channel and setting the noise level

`awgn_channel` adds `sigma*G` to the A symbol of each data bit and `sigma*H`
to its B symbol. It then draws a new pair, so every symbol gets its own noise
sample. The mapped levels are +1 for a 0 symbol and -1 for a 1 symbol
(`symbol_mapper`, y = 1 - 2x). The sum is registered (one cycle of latency)
and saturated to the level range. `rx_clipped` flags a saturated sample, and
the top's `noise_clipped` holds the flag.

The noise standard deviation `sigma` follows from the requested
signal-to-noise ratio. With the symbol energy fixed at 1:

```
Es/N0 [dB] = Eb/N0 [dB] + 10 log10(k/n)      (-3.01 dB for rate 1/2)
sigma      = sqrt(1 / (2 * Es/N0))           (Es/N0 as a ratio)
D          = sigma / 2                       (quantizer decision level)
```

`snr_to_sigma` does this conversion. Its input `ebn0` is Eb/N0 in dB, a
signed 8-bit number with 3 fractional bits: 1/8 dB steps from -16 to
+15.875 dB. It outputs `sigma` and D in the unsigned 12-bit format with 8
fractional bits. Both outputs come from 256-entry tables that constant
functions compute at elaboration from the formulas above, so the lookup is
combinational. The code rate is a parameter (`RATE_K`/`RATE_N`), set to 1/2
in the top.

| Eb/N0 | `ebn0` | Es/N0 | sigma | `sigma` | D |
|-------|--------|-------|-------|---------|---|
| 0 dB  | 0   | -3.01 dB | 1.000 | 256 | 128 |
| 2 dB  | 16  | -1.01 dB | 0.794 | 203 | 102 |
| 4 dB  | 32  | 0.99 dB  | 0.631 | 162 | 81 |
| 6 dB  | 48  | 2.99 dB  | 0.501 | 128 | 64 |
| 8 dB  | 64  | 4.99 dB  | 0.398 | 102 | 51 |
| 10 dB | 80  | 6.99 dB  | 0.316 | 81  | 40 |

In the top, `noise_en` low forces sigma and D to zero: the channel is then
noise-free and the quantizer gives only the codes 0 and 7. The `sigma` in
use is also an output of the top.

## Quantization

`soft_quantizer` turns a received level into three bits. The thresholds are
the multiples of a decision level D: -3D, -2D, -D, 0, D, 2D, 3D. The output
code is the number of thresholds that lie above the level:

| level x | code | | level x | code |
|---------|------|-|---------|------|
| x >= 3D | 0 (confident 0) | | -D <= x < 0 | 4 |
| 2D <= x < 3D | 1 | | -2D <= x < -D | 5 |
| D <= x < 2D | 2 | | -3D <= x < -2D | 6 |
| 0 <= x < D | 3 | | x < -3D | 7 (confident 1) |

The code's top bit is the hard decision: 1 for a negative level. It is also
available on `q_hard`, so a hard-decision decoder can use that alone. Three
bits of soft information typically gain about 2 dB over hard decisions, and
more bits add little.

The top sets D = sigma/2 (from `snr_to_sigma`). With this choice the outer
thresholds sit at +-1.5 sigma, so the noise-free levels +-1 fall into the
outer codes at low noise. The uniform quantizer and D = 0.5 sigma are the
scheme's own. The exact placement of the thresholds at integer multiples of
D, and the numbering from 0 (confident zero) to 7 (confident one), are this
implementation's reading. A decoder that expects the reverse order only
needs `~q_soft`. `QBITS` generalizes the quantizer to 1..8 bits: 2^QBITS - 1
thresholds at the multiples of D.

## Counting errors

`error_counter` stores every data bit the encoder takes in a 64-deep FIFO
(`ERR_DEPTH`). A decoder returns bits in order with any latency up to that
depth. Each bit it returns is compared with the oldest stored bit:

- `bit_count` counts the comparisons.
- `err_count` counts those that differ.
- The bit error rate is `err_count / bit_count`.

Flags and reset:

- `err_overflow` flags a data bit that found the FIFO full. That bit is lost
  from the comparison.
- `err_underflow` flags a decoded bit that arrived with nothing to compare.
- Both flags stay set until `clear_stats`.
- The counters add up over bursts until `clear_stats`.

The decoder must return only the n data bits of a burst, not the two flush
bits. A decoder with a traceback longer than 64 bits needs a larger
`ERR_DEPTH`.

## Using the top module

`fec_link_top` ports, in groups:

- **Burst control.** With `busy` low, pulse `start` for one clock. Hold
  `burst_len`, `ebn0` and `noise_en` at that edge, and keep `ebn0` and
  `noise_en` steady during the burst. `start` clears the encoder, and the
  burst runs by itself. `busy` stays high until the last quantized symbol
  has left.
- **To the decoder.** `q_valid`, `q_soft[2:0]`, `q_hard`, `q_sel` (A or B
  symbol of a pair) and `q_last` (last symbol of the burst, after the flush
  pairs). The decoder has no way to stall the stream, so it must accept one
  symbol per clock.
- **From the decoder.** `dec_valid` and `dec_bit`: one decoded data bit per
  cycle with `dec_valid` high.
- **Statistics.** `bit_count`, `err_count`, `err_overflow`, `err_underflow`
  and `noise_clipped`. `clear_stats` zeroes them.
- **Noise control.** `noise_reseed` restarts the noise sequence, so a run
  can be repeated exactly. The data sequence continues from burst to burst.

Latency: a data bit taken at cycle t gives its A symbol at the encoder
output at t+1. That symbol leaves the quantizer at t+3: one cycle in the
channel register and one in the quantizer register.

Number formats (`fec_pkg`):

- Levels are signed 12-bit numbers with 8 fractional bits: +1.0 = 256, range
  -8 .. +7.996.
- `sigma` and D are unsigned 12-bit numbers with 8 fractional bits.
- `ebn0` is a signed 8-bit number of dB with 3 fractional bits.
- The level range holds a unit symbol plus the largest noise sample
  (3.9 sigma) for sigma up to 1.8, which is Eb/N0 above about -5 dB. At
  lower Eb/N0 the channel saturates and says so.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_conv_encoder` | The worked example above, symbol for symbol, in 34 consecutive clocks. 20 random bursts against the state and output tables. A/B order, `sym_last`, flush back to state 00, and `clear`. |
| `tb_data_source` | Every bit against a reference xorshift sequence, under random back-pressure. Burst lengths, `out_last`, and a share of ones of about one half. |
| `tb_symbol_mapper` | All input combinations: 0 maps to +1.0 and 1 maps to -1.0. |
| `tb_gaussian_noise_gen` | 20,000 pairs against a floating-point model of the Rayleigh/uniform formulas (within 2 LSB). Mean, variance and G/H correlation. Holding without `next`, and zero noise at sigma 0. |
| `tb_snr_to_sigma` | All 256 Eb/N0 inputs against the formulas in floating point (within 1 LSB). sigma = 1 at 0 dB, and sigma = sqrt(1/2) at about 3 dB. |
| `tb_awgn_channel` | Exact pass-through at sigma 0. Noise statistics at sigma 0.5. Independence of the A and B samples. Saturation at sigma 4. |
| `tb_soft_quantizer` | 5,000 levels, many on or next to a threshold, against floor(x/D), for 3 and 4 bits. The hard decision. All eight 3-bit codes occur. |
| `tb_error_counter` | Random delayed streams with injected errors. Overflow, underflow and clear. |
| `tb_fec_link_top` | End to end at the default parameters; see below. |
| `tb_link_snr_sweep` | The whole link at Eb/N0 = 0, 2, 4 and 6 dB, 8,004 symbols each. The hard-decision symbol error rate must match the theoretical Q(sqrt(2 Es/N0)) for antipodal signals in AWGN: for example 0.105 measured against 0.104 at 2 dB. |

`tb_fec_link_top` stands in for the decoder. For the (7,5) code the sum of a
pair's two symbols equals the previous data bit, so it inverts the code on
the hard decisions with one bit of delay. It runs four bursts:

1. Noise off. Every symbol equals the symbol sent, as recomputed
   independently, and no errors are counted.
2. Eb/N0 = 2.5 dB, which gives sigma = 0.75. The symbol error rate is near
   Q(1/sigma), and the error counter agrees with the testbench's own count.
3. Eb/N0 = -16 dB. The channel saturates.
4. Decoded bits withheld. This gives FIFO overflow, then underflow, then a
   statistics clear.

The testbench counts how often each mechanism happened and fails if one
never did: flushing, start from state 00, hard-decision errors, every soft
code, saturation, bit errors, overflow, underflow and clear.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/fec_pkg.sv tb/tb_fec_link_top.sv --top-module tb_fec_link_top -o sim
./obj_dir/sim
```

Replace the testbench name to run the others. Each one finishes in seconds.

## Departures and open points

- **No decoder.** Viterbi decoding is outside this design. The ports above
  are where it connects.
- **No carrier.** Modulation onto a carrier and demodulation are left out on
  purpose. At baseband, the effect of AWGN on the symbols is modelled
  exactly.
- **Quantizer transfer curve.** Thresholds at the integer multiples of D,
  with codes 0..7 from positive to negative, are this implementation's
  choice. The uniform spacing and D = sigma/2 are the scheme's.
- **Noise tail.** The tail is cut at 3.9 sigma by the 1024-entry tables
  (see Noise generation).
- **Random sources.** The uniform generators are 32-bit xorshift
  generators with fixed seeds (parameters `DATA_SEED` and `NOISE_SEED`).
  Their statistics are good for this use, but they are not
  cryptographic-grade, and the data and noise streams repeat after
  2^32 - 1 draws.
- **Design choices.** The single clock, the valid/ready and start/busy
  handshakes, the burst flags, the fixed-point widths and the error FIFO
  belong to this implementation.
- **Rate.** Only rate 1/2 codes are supported. `snr_to_sigma` handles any
  rate, but the encoder would need more adders and a longer selector cycle.

## Files

- `rtl/fec_pkg.sv`: level and sigma types, the selector enum and saturation.
- `rtl/uniform_rng.sv`: the 32-bit xorshift uniform generator.
- `rtl/data_source.sv`, `rtl/conv_encoder.sv`, `rtl/symbol_mapper.sv`,
  `rtl/snr_to_sigma.sv`, `rtl/gaussian_noise_gen.sv`, `rtl/awgn_channel.sv`,
  `rtl/soft_quantizer.sv`, `rtl/error_counter.sv`: the blocks of the chain.
- `rtl/fec_link_top.sv`: the link.
- `tb/tb_*.sv`: one testbench per block, plus the end-to-end one.
