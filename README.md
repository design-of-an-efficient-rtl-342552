# BPSK transceiver for the IEEE 802.15.4 868/915 MHz PHY

This is a small, fully digital model of an IEEE 802.15.4 physical layer that
uses binary phase-shift keying (BPSK). A bit stream is differentially encoded,
spread with a 15-chip pseudo-random code and put on a sine carrier. The carrier
comes from a digital frequency synthesizer (DFS), which builds the sine from
adders and multiplexers instead of a sine look-up table or a VCO. The samples
then pass through a noise model of the channel. The receiver mirrors the
transmitter, and a bit-error-rate (BER) unit counts how many bits came back
wrong.

The whole design runs at one bit per clock. There is no analog front end:
`tx_out` is a 12-bit baseband-rate sample stream, and the channel is a
digital noise model, so transmitter and receiver live in the same design
(a loopback test system).

```
 din ─► FIFO ─► diff. encoder ─► symbol→chip ─► BPSK modulator ─► tx_out
          │ x                                      (DFS)            │
          │                                                         ▼
          │                          noise a(t) ─► ÷ s ─► d(t) ─►  OR  ─► rx_in
          ▼                                                         │
   delay (3 clk) ─► delayed_in ─► compare ◄─ dout ◄─ diff. decoder ◄─ chip→symbol ◄─ BPSK demodulator
                                     │                                                (DFS, 2 D-FFs)
                            error, error_cnt, total_din
```

## Modules

| file | role |
|---|---|
| `rtl/bpsk_pkg.sv` | chip words, sample type, chip-position helpers |
| `rtl/dfs.sv` | digital frequency synthesizer (sine carrier) |
| `rtl/tx_fifo.sv` | FIFO between the data source (MAC layer) and the encoder |
| `rtl/diff_encoder.sv` | s<sub>i</sub> = s<sub>i-1</sub> ⊕ x<sub>i</sub> |
| `rtl/sym2chip.sv` | symbol to chip |
| `rtl/bpsk_mod.sv` | I/Q carrier, adder, polarity select |
| `rtl/transmitter.sv` | FIFO + encoder + symbol-to-chip + modulator |
| `rtl/awgn_gen.sv` | LFSR-based Gaussian noise a(t) |
| `rtl/awgn_channel.sv` | divider by the scaling factor, OR with the signal |
| `rtl/bpsk_demod.sv` | local DFS, two D-FFs, polarity comparator |
| `rtl/chip2sym.sv` | chip to symbol |
| `rtl/diff_decoder.sv` | y<sub>i</sub> = S<sub>i</sub> ⊕ S<sub>i-1</sub> |
| `rtl/receiver.sv` | demodulator + chip-to-symbol + decoder |
| `rtl/ber_calc.sv` | delayed input, error flag, error and bit counters |
| `rtl/transceiver_top.sv` | everything above, wired as in the diagram |

The MAC layer that supplies the data is outside the design. Its bits enter
through `din`/`din_valid`/`din_ready`.

## The carrier: a sine without a table

`dfs` is a phase accumulator followed by three small stages. Each stage turns
one wave shape into the next:

1. **Saw-tooth.** A 16-bit phase register adds the frequency control word
   every clock, so f<sub>o</sub> = f<sub>clk</sub> · fcw / 2<sup>16</sup>.
   For example, fcw = 16384 gives f<sub>clk</sub>/4.
2. **Triangle (ones-complement unit).** In the second and fourth quarter
   periods, the second-highest phase bit inverts the 14 bits below it. The
   result is a 14-bit triangle that rises over a quarter period and falls over
   the next.
3. **Half-sine (multiplexer tree and adder).** The top two triangle bits pick
   one of four segments. For that segment, a multiplexer gives a base value
   2047·sin(kπ/8) and a set of right-shifted copies of the position inside the
   segment. An adder sums them. Each slope is a sum of powers of two:

   | segment | base | slope terms (of the 12-bit position) |
   |---|---|---|
   | 0 | 0 | 1/8 + 1/16 + 1/256 |
   | 1 | 783 | 1/8 + 1/32 + 1/256 + 1/512 |
   | 2 | 1447 | 1/16 + 1/32 + 1/64 |
   | 3 | 1891 | 1/32 + 1/256 + 1/512 |

   This gives a four-segment piecewise-linear |sin| with a peak of 2040. The
   error is at most about 44 LSB (about 2 %) of the ideal 2047·sin.
4. **Full sine (format converter).** The phase MSB negates the half-sine in
   the second half period. The output is a 12-bit two's-complement sine.

The sample is combinational from the phase register. After reset, sample n
belongs to phase n·fcw.

## Modulation and the chip decision

This is the part that most needs explaining. One chip lasts one clock, while
a carrier period lasts several clocks. "BPSK" here therefore means flipping
the polarity of individual carrier samples, not of whole carrier cycles.

**Transmitter (`bpsk_mod`).** The in-phase value is the DFS sample s(n). The
quadrature value is the inverted (ones-complement) DFS sample of the previous
clock, ~s(n-1). At f<sub>clk</sub>/4 that one-clock delay is exactly a quarter
period. The adder forms h(n) = ⌊(s(n) + ~s(n-1)) / 2⌋: the sum has 13 bits and
is halved to fit 12 bits. The chip then picks `tx = chip ? h : ~h`. Chip 1
sends the carrier and chip 0 sends it shifted by 180°. Because ~h = −h−1,
chip 0 always has the opposite sign of chip 1, even when h is 0. At
f<sub>clk</sub>/4 a run of chip-1 samples reads −1, 1019, −1021, −1021, 1019,
1019, …; no sample after the first is near zero.

The polarity multiplexer sits after the adder, so each output sample depends
on only one chip. If the multiplexer came before the Q delay, every sample
would add the current chip's I value to the previous chip's Q value. At one
chip per clock the receiver could then not separate them.

**Receiver (`bpsk_demod`).** The receiver has its own DFS with the same
`fcw`, reset at the same time as the transmitter's, so the two carriers run in
step. The design has no carrier or timing recovery; it relies on the shared
reset. Two D flip-flops delay the local carrier by one and two clocks. From
them the reference h is rebuilt exactly as the transmitter built it:
D-FF1 + ~D-FF2, halved. It lines up with the received sample, which left the
transmitter's adder one clock earlier. The comparator decides chip 1 when the
received sample and the reference have the same sign bit, and chip 0
otherwise. Without noise the decision is always right, for any `fcw`.

**Spreading.** Symbol 0 uses the chip word 09AF (hex) and symbol 1 uses 7650.
Over 15 bits the two words are complements of each other. Both ends keep a
chip position counter that steps once per valid chip, bit 0 first, and wraps
after 15. The transmitted chip is bit *k* of the symbol's word. The receiver
takes symbol = (chip == bit *k* of 7650). Each bit is therefore sent as a
single chip: the code scrambles the chip polarity but gives no spreading gain.

**Differential coding.** The decoder forms y<sub>i</sub> = S<sub>i</sub> ⊕
S<sub>i-1</sub>, so inverting the whole symbol stream does nothing. In
exchange, one wrong chip turns into two wrong bits: the bit on each side of
it.

## The channel model and what the BER numbers mean

`awgn_gen` advances a 64-bit Galois LFSR (x⁶⁴+x⁶³+x⁶¹+x⁶⁰+1) by 96 steps per
clock. It sums the twelve 8-bit numbers those steps produce and subtracts 1530.
The result a(t) is approximately Gaussian with zero mean and a standard
deviation of 256, which is "1.0" in a format with 8 fractional bits. Its
range is ±1530, about ±6σ.

`awgn_channel` divides a(t) by 256·s and truncates toward zero. The result
d(t) is in transmitter LSBs and has variance 1/s². The SNR is taken as s²/4,
so s = 4 is 6 dB. The corrupted sample is the **bitwise OR** d'(t) = d(t) | m(t).
The OR has a simple effect on the sign, which is all the receiver looks at:

* a negative sample stays negative whatever the noise;
* a non-negative sample turns negative exactly when d(t) < 0, that is when
  a(t) ≤ −256·s.

So the chip error rate is P(m ≥ 0) · P(a ≤ −256 s) ≈ ½ · P(a ≤ −256 s). The
signal amplitude plays no part. The bit error rate is about twice that.
Computed exactly for the twelve-term sum:

| s | SNR (s²/4) | expected BER | simulated |
|---|---|---|---|
| 1 | −6 dB | 0.148 | 0.149 (6,000 bits) |
| 2 | 0 dB | 0.022 | – |
| 3 | 3.5 dB | 1.0 × 10⁻³ | 1.03 × 10⁻³ (150,000 bits) |
| 4 | 6 dB | 8.6 × 10⁻⁶ | 0 errors in 150,000 bits |

At s = 4 that is about 1.3 expected errors in 150,000 bits. For the same run,
this transceiver architecture has been reported with 3 errors
(2 × 10⁻⁵). These numbers describe this particular noise model. They are not
the BER of a BPSK link in real Gaussian noise.

`ber_calc` delays the bit entering the encoder by the chain latency (3
clocks) to give `delayed_in`. It raises `error` when a valid `dout` differs
from it. `total_din` counts bits entering the transmitter and `error_cnt`
counts errors. The error counter saturates; `total_din` wraps. Read
BER = error_cnt / total_din once the pipeline has drained, 3 clocks after
the last bit.

## Interface and timing of `transceiver_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; asynchronous reset, high = reset |
| `din`, `din_valid`, `din_ready` | in/in/out | 1 | data write port; a bit is taken when `din_valid && din_ready` |
| `fcw` | in | 16 | carrier frequency word for both DFS units; change it only under reset |
| `scale` | in | 8 | noise scaling factor s; 0 = noiseless channel |
| `tx_out`, `tx_valid` | out | 12, 1 | transmitted sample and its valid flag |
| `rx_in` | out | 12 | sample after the channel |
| `dout`, `dout_valid` | out | 1 | received bit |
| `delayed_in`, `error` | out | 1 | aligned input bit, mismatch flag |
| `total_din` | out | 18 | bits sent |
| `error_cnt` | out | 16 | bit errors |

* Throughput: one bit per clock while the FIFO holds data.
* Latency: a bit written in cycle n is at the FIFO head in n+1, on `tx_out`
  in n+2, decided as a chip in n+3, and on `dout` in n+4. That is 3 clocks
  from the encoder input to `dout` and 4 from the write.
* The FIFO (16 deep) drains at the maximum write rate, so `din_ready` only
  falls if the design is changed to drain more slowly. When the FIFO is
  empty nothing valid is sent, and the encoder and chip counters hold. The
  valid flag travels with the samples through the channel, and it stands in
  for frame synchronisation, which this design does not have.
* Both DFS units, the chip counters and the coders start together at reset.
  Keep `fcw` stable while `rst` is low.

## Departures and open points

These are the places where this RTL makes its own choice or differs from the
architecture it follows:

* **Multiplexer position in the modulator.** The architecture drawing puts
  the chip-selected multiplexer between the DFS and the I/Q paths. Here it
  follows the adder, for the reason given above.
* **Comparator.** The demodulator's comparator is described as "equal →
  1". Here it compares polarity, because exact 12-bit equality fails under
  any noise.
* **Latency and throughput.** The source design reports 3.5 clock cycles
  of latency and 76.62 Mbps (its 268.2 MHz clock divided by 3.5). This RTL
  has 3 or 4 clocks of latency, as above, and delivers one bit per clock.
* **`total_din` width.** It is 18 bits so that a 150,000-bit run fits. A
  17-bit counter, as shown for the original design, stops at 131,071.
* **Start-up.** The original simulation shows an error counted at start-up.
  Here the validity flags keep the counters quiet until real data arrives.
* **Frequency bands.** The 868 MHz and 915 MHz (or 902 MHz) bands appear
  only as values of `fcw`. A carrier at those frequencies needs a clock
  above twice the carrier frequency, or an analog up-converter that is not
  part of this design.
* **Unspecified details, chosen here.** The accumulator width (16), the
  half-sine segments and slopes, the FIFO depth and handshake, the chip bit
  order, the reset values (0), the LFSR and Gaussian construction, the
  noise truncation and the meaning of s = 0 are all choices of this design.
* **FPGA figures.** Area (123 slices, 187 LUTs), f<sub>max</sub>
  (268.2 MHz) and power (108 mW on Artix-7) belong to the original
  implementation and have not been measured for this RTL.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With plain Verilator (version 5), from the
folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/bpsk_pkg.sv tb/tb_transceiver_top.sv --top-module tb_transceiver_top -o sim
./obj_dir/sim
```

To run another testbench, replace the testbench file and top name:

| testbench | what it shows |
|---|---|
| `tb_transceiver_top` | end to end at default parameters: 4-clock latency; error-free noiseless runs at three carrier frequencies with input gaps; BER ≈ 15 % at s = 1; BER < 10⁻³ at s = 4; counters equal the testbench's own counts |
| `tb_ber_run` | 150,000 bits at s = 4 (6 dB), then 150,000 at s = 3, at default parameters; under a second of run time |
| `tb_dfs` | phase accumulation, sine within 48 LSB of ideal, odd symmetry, output frequency |
| `tb_bpsk_mod`, `tb_bpsk_demod` | exact modulator samples; chip recovery at five carrier frequencies, including forced sign flips |
| `tb_transmitter`, `tb_receiver` | transmitter against a reference model; receiver recovers every bit 3 clocks later, and one inverted sample gives exactly two bit errors |
| `tb_awgn_gen`, `tb_awgn_channel` | noise mean, σ, 1σ/2σ fractions; OR/divider rule and flip rates |
| `tb_tx_fifo`, `tb_diff_encoder`, `tb_sym2chip`, `tb_chip2sym`, `tb_diff_decoder`, `tb_ber_calc` | unit checks against models in the testbench |

## Changing the design

* **Carrier frequency:** the `fcw` input. f<sub>clk</sub>/4 (16384) keeps
  every sample well away from zero.
* **Noise level:** the `scale` input. Use `NOISE_SEED` for a different noise
  sequence.
* **Wider phase accumulator:** the `PHASE_W` parameter, at least 16. The
  half-sine uses the 12 bits below the top four.
* **Other chip words:** `CHIP0`/`CHIP1` in `bpsk_pkg`. The receiver's
  one-chip decision assumes the two words are complements.
* **Different chain latency:** if you add or remove a register between the
  encoder and `dout`, change `CHAIN_LATENCY` in `transceiver_top` to match.
  An assertion in `ber_calc` reports a mismatch.
