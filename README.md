# 8-point Slantlet PCC-OFDM transceiver

This is a baseband OFDM transmitter and receiver in SystemVerilog. The FFT of
ordinary OFDM is replaced by an 8-point **Slantlet transform**. The Slantlet
transform is an orthogonal wavelet transform built from piecewise-linear
filters with two vanishing moments. The link also uses **polynomial
cancellation coding (PCC)**: each QAM symbol goes onto a pair of adjacent
subcarriers with weights +1 and -1. The pair's side lobes then cancel, so the
link is less sensitive to frequency offset and inter-carrier interference.
PCC costs half the bandwidth. All arithmetic is integer. The transform
coefficients are real numbers stored in units of 10^-4, so the samples
between transmitter and receiver carry a 10^4 scale factor.

The transmitter and receiver are separate halves with separate clocks. The
top module, `slt_pcc_ofdm`, puts them side by side. The channel between them
is not part of the design: connect `tx_*` to `rx_*` for a loopback, or put a
channel model in between.

## Signal chain

One OFDM symbol carries 6 bits.

| stage | module | in -> out per symbol | clocks |
|---|---|---|---|
| serial to parallel | `se2pa_t` | 6 serial bits -> 6-bit word | 1 after the 6th bit |
| 4QAM map (SM, SM2) | `sm` | 6 bits -> 3 symbols -> 3 real + 3 imaginary levels (+-1) | 2 |
| PCC, per rail | `pcc` | 3 levels -> 6 subcarriers | 1 |
| zero pad, per rail | `zepd` | 6 -> 8 (`{0, p0..p5, 0}`) | 1 |
| inverse Slantlet, per rail | `isltsaf` | 8 levels -> 8 samples, 18-bit, x10^4 | 1 |
| parallel to serial | `pa2se_t` | 16 words, real rail first, one per clock | 16 |
| display | `seven_segment` | current word -> sign + 4 decimal digits | 1 |
| serial to parallel | `s2pr` | 16 words -> two rails of 8 | 1 after the last word |
| Slantlet, per rail | `sltsaf` | 8 samples -> 8 values, 37-bit, x10^8 | 1 |
| pad removal, per rail | `dzepd` | 8 -> 6 (drops positions 0 and 7) | 1 |
| PCC demap, per rail | `depcc` | `v_i = (r_2i - r_2i+1) / 2`, 6 -> 3 | 1 |
| 4QAM decision (DSM, DSM2) | `dsm` | signs -> 3 symbols -> 6 bits | 2 |
| parallel to serial | `serial_converter` | 6 bits, MSB first | 6 |

The 4QAM map is 00 -> (-1,+1), 01 -> (-1,-1), 10 -> (+1,+1), 11 -> (+1,-1).
Written as (real, imaginary), the first bit of a pair sets the real sign and
the second the imaginary sign. The receiver inverts this: Bit1 = (real > 0),
Bit2 = (imaginary < 0). A value of exactly zero therefore counts as a
negative real part or a positive imaginary part.

Every stage registers its outputs and passes a valid flag along. The two
rails run in lock step, and assertions in the wrapper modules check this.

## The Slantlet matrix

Both transforms use the same 8x8 integer matrix S, produced by `slt_coefs`.
`isltsaf` computes x = S^T y and `sltsaf` computes z = S x. S is orthonormal
to within rounding, so a round trip returns each level times 10^8.

The rows follow the channels of a three-scale Slantlet filter bank:

| row | filter | taps (x10^4) |
|---|---|---|
| 0 | low-pass, constant | 3536 (= 1/sqrt 8) on all 8 |
| 1 | next channel, ramp | 5401 3858 2315 772 -772 -2315 -3858 -5401 (= (7-2n)/sqrt 168) |
| 2 | g2(n) | -5062 -874 3314 7502 -793 -1077 -1361 -1645 |
| 3 | g2(7-n) | the same taps reversed |
| 4, 5 | g1(n) at positions 0-3 and 4-7 | -5117 8279 -1208 -1955 |
| 6, 7 | g1(3-n) at positions 0-3 and 4-7 | -1955 -1208 8279 -5117 |

The detail filters g_i, with m = 2^i, each consist of two straight lines of
m taps. These are Selesnick's closed forms:

    s1 = 6 sqrt(m / ((m^2-1)(4m^2-1)))      s0 = -s1 (m-1)/2
    t1 = 2 sqrt(3 / (m(m^2-1)))             t0 = ((m+1) s1/3 - m t1)(m-1)/(2m)
    g_i(n) = (s0+t0)/2 + (s1+t1)/2 * n        for n < m
           = (s0-t0)/2 + (s1-t1)/2 * (n-m)    for m <= n < 2m

`getg` returns the start value and slope of each line, rounded to 10^-4, for
the filter and for its time reverse. `slt_coefs` expands these lines into
taps. The rounded constants are in `ofdm_pkg`.

The two coarse rows need care. In an 8-point block every detail row has two
vanishing moments. The two remaining rows must therefore span {1, n}: a
constant and a linear ramp. The 16-tap low-pass filters of the infinite
Slantlet filter bank do not fit into an 8-point block. The constant/ramp pair
chosen here reproduces published fixed-point results for the 4-point case:
- The 4-point inverse transform of {0,1,1,0} is 0.1592, 1.0515, -0.3444, -0.8663.
- The 4-point forward transform of {1,-7,1,-1} is -3.0000, -0.4472, -6.2324, 1.9898.

With N = 4, both transform modules reproduce these to within 1 unit of
10^-4, and their testbenches check it. The parameter `N` of `isltsaf`,
`sltsaf` and `slt_coefs` accepts 4 or 8. The rest of the chain is 8-point
only: with N = 4, PCC and zero padding leave room for just one symbol per
rail.

**Number formats.** The transform inputs are levels -1, 0 or +1. The
transmitter outputs are exact sums of 10^4-scaled coefficients and fit 18
bits signed, with a largest magnitude of about 2.3 x 10^4. The receiver
multiplies 18-bit samples by 16-bit coefficients and sums eight products, so
it accumulates in 37 bits with no overflow for any 18-bit input. A
transmitted +1 comes back as about +10^8. The end-to-end test adds noise of
up to +/-2000 units (0.2 of a level) to each received word, and every symbol
still decodes correctly. Larger noise has not been tested.

## PCC and its sign convention

The encoder writes p[2i] = u[i] and p[2i+1] = -u[i]. The decoder forms
(r[2i] - r[2i+1]) / 2, which returns u[i] exactly. The division is an
arithmetic shift, so it rounds toward minus infinity. This only matters near
zero, and the decision stage looks only at the sign.

The encoder equation of the original design has an alternating sign,
(-1)^(i+1) u_i and (-1)^i u_i. Combined with its decoder equation, that would
return -u_i for every second symbol. The published decoder results match the
plain +1/-1 pair, so that convention is used here.

## Framing, rate and timing

- **Input rate.** A symbol holds 6 input bits but takes 16 clocks on the
  serial output. The input must therefore average at most 6 valid bits
  (`se_valid`) per 16 clocks. At exactly that rate the output words run back
  to back with no gap.
- **Overrun.** A symbol whose sixth bit arrives while the serialiser is still
  sending the previous one is dropped, and `tx_overrun` pulses for one clock.
  `tx_busy` shows when the serialiser can take a new symbol.
- **Symbol start.** `tx_sof` marks the first of the 16 words. The receiver
  needs it on `rx_sof`, because it does no symbol synchronisation of its own.
  Words received before the first `rx_sof` are ignored. A symbol cut short by
  a new `rx_sof` is discarded.
- **Word order.** The real rail x0..x7 comes first, then the imaginary rail
  x0..x7.
- **Latency.** In loopback on one clock:
  - The first word leaves 6 clocks after the edge that takes the sixth input bit.
  - The parallel bits (`rx_bits_valid`) appear 5 clocks after the edge that takes the last word.
  - The first output bit on `dout` appears 28 clocks after the sixth input bit.
- **Reset.** `rst` is synchronous and active high. It clears every register
  that is read.

## Display

`seven_segment` shows the current transmitter word in decimal, with a sign
lamp and four BCD digits. `y1` is the most significant digit. For magnitudes
above 9999 the trailing digits are dropped, so 10515 shows as 1051. This
matches a published table of fixed-point ISLT results. The outputs are BCD
digits, not segment patterns.

## Symbol size

The top's parameter `K` sets the number of 4QAM symbols per rail. Each OFDM
symbol then carries 2K bits. The default is K = N/2 - 1 = 3, which leaves one
zero pad at each end of the 8-point block. With a smaller K, the 2K PCC
subcarriers sit in the middle of the block, and (N - 2K)/2 zeros go at each
end. N - 2K must be even, and the top stops elaboration otherwise. K = 2
gives 4-bit symbols. The input may then average 4 bits per 16 clocks. The
first output bit still comes 28 clocks after the last input bit.
`tb_slt_pcc_ofdm_k2` tests this case end to end.

## Where this design departs from the original

- **Coarse transform rows.** The original three-scale filter bank has 16-tap
  low-pass and neighbouring filters, h3 and f3. A 16-tap filter cannot be a
  row of an 8-point block transform. Here they are replaced by the constant
  and ramp rows described above, which reproduce the original's 4-point
  results.
- **Detail filter taps.** The taps are expanded from line parameters
  rounded to 10^-4. They can therefore differ by 1 unit of 10^-4 from the
  exact values. For example, g2(5) is -0.1077 here; exactly, it is -0.10777.
- **Order of the detail rows in the inverse.** One waveform example of the
  original 4-point inverse transform pairs the two g1 inputs with the
  filters in the opposite order to its table of results. This design
  follows the table, because that order makes the inverse transform undo
  the forward one.
- **PCC signs.** The encoder uses the plain +1/-1 pair, not the alternating
  sign of the original's encoder equation (see above).
- **Merged stages.** The original splits some stages into two or three
  entities: SM and SM2, DSM and DSM2, two serialiser entities in the
  transmitter, and three serial-to-parallel entities (S2PR1-3) in the
  receiver. Here each group is one module with internal pipeline registers.
- **Receiver input.** The original receiver schematic has a 3-bit input
  (`s2p_in[2..0]`) whose format is not described. Here the receiver takes
  the transmitter's 18-bit words, with a valid flag and a start-of-symbol
  flag.
- **Handshakes.** The original brings the output serialiser's `load` in from
  a pin. Here the decision stage's valid flag drives it. The valid flags,
  `tx_sof`, `tx_busy` and `tx_overrun` are additions.
- **Symbol size.** The original top-level builds use 4-bit symbols, and its
  block diagrams use 6-bit symbols. The default here is 6 bits. 4 bits is
  available through `K` (see above).

## Not included

- **Channel.** The AWGN and Rayleigh-fading channel is a simulation item, not
  hardware. It is left as ports.
- **Training and channel estimation.** Training-sequence insertion, channel
  estimation and channel compensation are mentioned for OFDM in general but
  are not part of this chain. With a fading channel, the receiver as built
  decides on raw signs.
- **Unspecified ROM.** A small ROM (8 words of 3 bits) appears in the
  transmitter's original top-level schematic. Its contents and purpose are
  unknown, so it is omitted.
- **Original FPGA figures.** The FPGA on which the design was first built
  reported 772 logic elements, 485 registers, 25 pins and about 72 MHz.
  Those builds had 4-bit symbol ports, so they were smaller than the default
  here. This RTL also brings out every framing signal of both halves, so it
  has many more pins. It has not been mapped to an FPGA. Generic synthesis
  of the default top gives about 700 cells and 1577 flip-flop bits.

## Files

Hierarchy (`rtl/`):

    slt_pcc_ofdm            top: transmitter and receiver side by side
      tx_top                se2pa_t, transsaf, seven_segment
        transsaf            sm, pcc x2, three_block
          three_block       zepd x2, isltsaf x2, pa2se_t
      rx_top                s2pr, safrec, serial_converter
        safrec              sltsaf x2, dzepd x2, depcc x2, dsm
    isltsaf, sltsaf         -> slt_coefs -> getg
    ofdm_pkg                sizes, number formats, coefficient constants

Each module has a testbench `tb/tb_<module>.sv`. The testbenches check the
module against `tb/tb_ref_pkg.sv`, a reference model written separately: it
computes the Slantlet filters with real arithmetic and builds the reversed
filters from the taps. Each testbench prints `TB_RESULT checks=N failures=M`.

`tb_slt_pcc_ofdm` runs the whole link at its default size:
- It sends all 64 bit patterns at the full rate, back to back.
- It forces one overrun.
- It sends 30 symbols through a channel adding noise of up to +/-2000 per word.
- It checks every output bit and every symbol latency.

`tb_slt_pcc_ofdm_k2` does the same for 4-bit symbols (K = 2), without noise.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/ofdm_pkg.sv tb/tb_ref_pkg.sv \
        tb/tb_slt_pcc_ofdm.sv --top-module tb_slt_pcc_ofdm -o sim
    ./obj_dir/sim

Use the same command with another `tb_<module>` to test a single block.
Lint a module with
`verilator --lint-only -Wall -y rtl rtl/ofdm_pkg.sv rtl/<module>.sv`.

To change the arithmetic precision, edit `COEF_W`, the coefficient constants
in `ofdm_pkg`, and the reference rounding in `tb_ref_pkg`. `TX_W` and `RX_W`
follow from them.
