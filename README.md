# Parallel mixed time/frequency domain QAM transmitter with FEC

A QAM transmitter has to shape its pulses with a square-root raised cosine
(SRRC) filter. In the time domain that filter is a convolution, and a
convolution wants its samples one after another, which caps the sample rate at
the clock rate. This design moves the filter into the frequency domain: a block
of N symbols is transformed with an N-point DFT, every bin is multiplied by the
filter's frequency response, and an IDFT brings the block back. Each step works
on all N samples at once, so the transmitter produces **N output samples per
clock** for any N. With N = 16 and 256-QAM at rate 1/2, that is 64 information
bits per clock, or 12.9 Gb/s at 201 MHz. With N = 32 at 146 MHz it is 18.7 Gb/s.

The chain is a convolutional FEC encoder, a Gray-coded QAM mapper, the parallel
DFT, the frequency-domain SRRC filter, the parallel IDFT and a quadrature
modulator. It is written in synthesizable SystemVerilog. Everything is set by
parameters: the number of lanes N, the QAM order, the code rate and the filter
length. All coefficient tables are computed while the design elaborates.

## Data path

```
 in[N*FORMAT/CODE]                                                        out[16N]
 ──► fec_encoder ─► qam_mapper ─► par_dft ─► freq_filter ─► par_dft ─► qam_modulator ──►
     N*FORMAT/CODE   N symbols     DFT        H[k]·X[k]      IDFT, 1/N   I·cos − Q·sin
     encoders        → I, Q                                                    tvalid
```

| block | module | what it does per clock | latency (clk) |
|---|---|---|---|
| FEC | `fec_encoder` (`conv_encoder` per lane) | 1 bit in, CODE bits out, per lane | 1 |
| mapper | `qam_mapper` | N symbols of FORMAT bits → N (I, Q) | 1 |
| DFT | `par_dft` | N² complex multiplies, N adder trees | log2 N + 2 |
| filter | `freq_filter` | 2N real multiplies | 2 |
| IDFT | `par_dft` (inverse weights) | as the DFT, plus a 1/N shift | log2 N + 2 |
| modulator | `qam_modulator` | DDS carrier, 2N multiplies, N subtractions | 4 |

The total latency is 2·log2 N + 12 clocks, which is 20 at N = 16. Every block
takes a new vector every clock. Data moves between blocks as unpacked arrays of
16-bit two's-complement samples (`logic signed [15:0] x [N]`). A `valid` bit
travels alongside the data through every pipeline.

## Top level: `transmitter`

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | lanes = samples per clock = DFT size (power of two) |
| `CODE` | 2 | coded bits per information bit: 2 = rate 1/2, 3 = rate 1/3, 1 = no FEC |
| `FORMAT` | 4 | log2 of the QAM order, 2..8 (4 = 16-QAM, 8 = 256-QAM) |
| `NUM_TAPS` | 11 | SRRC taps, odd, at most N |
| `ROLLOFF`, `OSF` | 0.5, 2 | SRRC roll-off and taps per symbol of the prototype |
| `F_CARRIER_HZ`, `F_CLK_HZ` | 100, 202.96e6 | carrier and clock frequency. Only their ratio matters: the sample rate is N·F_CLK_HZ. |

| port | width | |
|---|---|---|
| `clk`, `reset` | 1 | reset is synchronous and active high |
| `in` | N·FORMAT/CODE | information bits. Word *i* (FORMAT/CODE bits) sits at the low end for *i* = 0. |
| `out` | 16·N | modulated samples. Sample *i* is `out[16i+15:16i]`, and sample 0 is the earliest in time. |
| `tvalid` | 1 | `out` holds a valid vector |

There is no input handshake. After `reset` falls, the transmitter takes a word
every clock. `tvalid` rises 2·log2 N + 12 clocks after the first word and then
stays high, one vector per clock. To stop the stream, assert `reset`, which
also drops the words still in flight.

The information throughput is N·FORMAT/CODE bits per clock. The published
implementation reported these clock rates (FPGA figures; this RTL has not been
timed):

| N | QAM | rate | bits/clk | reported clock | throughput |
|---|---|---|---|---|---|
| 16 | 16 | 1/2 | 32 | 202.96 MHz | 6.49 Gb/s |
| 16 | 64 | 1/3 | 32 | 202.30 MHz | 6.47 Gb/s |
| 16 | 256 | 1/2 | 64 | 201.25 MHz | 12.88 Gb/s |
| 32 | 256 | 1/2 | 128 | 146.16 MHz | 18.71 Gb/s |

## FEC: one encoder per bit lane

`fec_encoder` holds N·FORMAT/CODE independent feed-forward convolutional
encoders. Lane *j* encodes the stream of bit *j* of successive input words, so
each lane sees one bit per clock and the bank needs no parallel encoding
algorithm. The codes are:

* rate 1/2: constraint length 7, generators 171 and 133 (octal);
* rate 1/3: constraint length 4, generators 13, 15 and 17 (octal).

The most significant bit of a generator weights the newest bit. Coded bit *c*
of lane *j* goes to bus bit `j*CODE + c`. The N·FORMAT coded bits are then read
as N symbols of FORMAT bits: symbol *i* is `[i*FORMAT +: FORMAT]`. Coded bits
from different lanes therefore share symbols. This is the bit placement of this
RTL; keep it if you need to match a receiver. `CODE = 1` turns each lane into a
register, which gives the uncoded configurations.

## Mapping and the scaling budget

`qam_mapper` splits each symbol. The upper ⌈FORMAT/2⌉ bits pick the in-phase
level and the lower ⌊FORMAT/2⌋ bits the quadrature level. Each field is Gray
coded, so neighbouring levels differ in one bit, and selects an odd level
−(L−1) … (L−1). For odd FORMAT (32-QAM, 128-QAM) the grid is rectangular
(8×4, 16×8), not a cross.

Getting the scaling right is the subtle part of the design. All samples are 16
bits, and the weights are Q1.15 with 32767 standing for 1.0. After every
multiplication the result is shifted right by 15 with symmetric rounding
(halves go away from zero) and then saturated. An N-point DFT can grow a
component by up to N·√2. The mapper therefore places its outermost in-phase
level at 2¹⁵/(2N), which is 1024 at N = 16, so 16-QAM uses ±341 and ±1023. The
DFT output then stays inside 16 bits for any symbol vector. The filter's
response has a peak of 1.0 and cannot grow the bins. The IDFT adds log2 N to
its shift to apply the 1/N factor, which brings the signal back to the
mapper's scale. The modulator's output stays below the peak I/Q magnitude.
Saturation is in place at every stage but never triggers from mapped symbols.
The cost is about 11 bits of used range out of 16 at N = 16. In exchange, no
block can overflow.

## The parallel DFT (`par_dft`)

One module serves as both the DFT and the IDFT. Its weights are inputs:
`ccos[k][n]` and `csin[k][n]`, and it computes

  X[k] = 2^−OSHIFT · Σₙ (xₙ,re + j·xₙ,im)(ccos[k][n] + j·csin[k][n]).

The forward transform gets csin = −sin and OSHIFT = 15. The inverse gets
csin = +sin and OSHIFT = 15 + log2 N. The top level computes both weight
tables at elaboration (`qam_tx_pkg::dft_cos_q15` and related functions).

The structure is brute force, on purpose:

1. **Clock 1.** All N² complex products are formed and registered at full
   precision (33 bits). The products are not rounded here.
2. **Clocks 2 … log2 N + 1.** For each bin, an adder tree for the real part and
   one for the imaginary part, each with N−1 adders and a register after every
   level. The tree is stored as a heap: node *j* adds nodes 2*j*+1 and 2*j*+2,
   and the leaves are the products. That gives 2N(N−1) adders in total.
3. **Clock log2 N + 2.** Symmetric rounding by 2^−OSHIFT and saturation.

This takes N² complex multipliers. Many weights are 0 or ±32767, and synthesis
removes those multipliers. N must be a power of two, so that an FFT could
replace this block without changing its interface. An FFT would be far smaller
for large N, but this design does not include one.

## Frequency-domain SRRC filter (`freq_filter`)

The filter multiplies bin *k* by a real H[k]. This takes 2N real multipliers
and two clocks (product, then rounding). H is computed at elaboration
(`qam_tx_pkg::filter_h_q15`) as follows:

1. Evaluate the SRRC impulse response at t = m/OSF for
   m = −(NUM_TAPS−1)/2 … (NUM_TAPS−1)/2.
2. Place these taps circularly around sample 0 and pad with zeros to N.
3. Take the N-point DFT. The taps are symmetric, so the result is real.
4. Scale so that the largest |H[k]| is 1.0.

The default uses 11 taps for N = 16. The N = 32 configuration uses 31 taps.

**Keep this in mind when using the design.** A product of N-point DFTs is a
*circular* convolution of length N. Each block of N symbols is filtered as if
it were periodic, and no overlap-add or overlap-save joins neighbouring
blocks. The output therefore equals a linear SRRC filter only within a block,
not across block edges. The testbenches check the RTL against exactly this
block-wise behaviour. If you need a true linear filter, add overlap-save
around the DFT and IDFT. That would double the transform size for the same
throughput.

## Carrier generation (`qam_modulator`)

The modulator computes out = I·cos(2πf₀t) − Q·sin(2πf₀t) for all lanes. Sample
*i* of the *c*-th valid vector is time t = c·N + i, at sample rate
N·F_CLK_HZ. A 32-bit phase counter advances by N·FCW per valid vector, where
FCW = round(f₀ / (N·f_clk) · 2³²). Lane *i* adds i·FCW. The top 10 bits of the
phase address a 1024-entry cosine table, and the sine is read from the same
table a quarter period earlier. The phase is only quantised to 2π/1024. For
full-scale samples this contributes up to about 0.3 % amplitude error, which
is the dominant error at high carrier frequencies. Reset clears the phase, and
the counter holds while input is not valid. The modulator's pipeline is table
look-up, a two-clock multiply with rounding, then subtraction, for a total of
4 clocks.

## Package `qam_tx_pkg`

This package holds the constants (sample width 16, 15 fractional bits) and the
elaboration-time functions:

* `round_sym` and `sat`: the rounding and saturation used by every stage;
* the DFT and IDFT weights;
* the SRRC response `srrc` and `filter_h_q15`;
* the carrier table and the frequency control word;
* the Gray level `pam_level` and the mapper step.

To use different filter coefficients, change `filter_h_q15` or replace `h[k]`
in `freq_filter`. No data files are involved.

## Precision

The testbenches compare the output with a floating-point model of the same
chain. The model has exact transforms, an exact SRRC response, and a carrier
whose phase is quantised like the DDS. The worst error seen is under 1 LSB at
the default configuration, out of a signal peak near 1450 LSB. With fast
carriers and N = 4 … 8 the worst error is about 1.6 LSB.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and stops itself with a watchdog.

| testbench | covers |
|---|---|
| `tb_fec_encoder` | rate 1/2, rate 1/3 and uncoded; impulse response = generators; random bits with gaps, against a per-lane software encoder |
| `tb_qam_mapper` | 16-, 32- and 256-QAM: every symbol, one-bit Gray steps, literal 16-QAM levels |
| `tb_par_dft` | N = 8 forward and inverse: bit-exact integer model and floating-point DFT (2 LSB); latency 5; saturation |
| `tb_freq_filter` | default size: recovers H[k]; H real, even and low-pass; random bins within 1 LSB; latency 2 |
| `tb_qam_modulator` | fast carrier against ideal I·cos − Q·sin within 2 LSB; held phase during gaps; latency 4; saturation |
| `tb_transmitter` | four reduced configurations (N = 4, 8): 16/32/64/256-QAM, rates 1/2, 1/3 and uncoded, pipeline-fill latency, mid-stream reset, one word per clock; each mechanism is counted |
| `tb_transmitter_full` | default parameters (N = 16, 16-QAM, rate 1/2, 11 taps): 200 words end to end |
| `tb_workloads_n16` | the nine N = 16 configurations (five QAM orders at rate 1/2, 64-QAM at rate 1/3, uncoded 16/32/64-QAM), each end to end, with the throughput implied by one word per clock compared with the reported rates |
| `tb_workloads_n32`, `tb_workloads_n32_mid` | the five N = 32 configurations (31 taps, 16- to 256-QAM, rate 1/2), end to end, with throughputs as above |

The helpers are `tx_ref_pkg` (reference models), `tx_check` (stimulus and
scoreboard for one transmitter), `tx_unit` (a transmitter with its checker),
and `enc_check` and `map_check` (per-configuration checkers).

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/qam_tx_pkg.sv tb/tx_ref_pkg.sv tb/tb_transmitter.sv --top tb_transmitter
./obj_dir/Vtb_transmitter
```

At N = 16 the build takes about 30 s per transmitter instance, because every
one of the 256 complex multipliers is elaborated separately. The simulations
themselves take well under a second.

## Where this RTL makes its own choices

Structure, port list, parameters, code polynomials, Gray mapping, the
pointwise frequency-domain filter, the 2^−15 rescaling with symmetric rounding,
the pipelined fully parallel DFT and the DDS modulator follow the published
architecture. The following are choices of this implementation:

* The rate-1/3 generators are taken as 13, 15, 17 (octal) with K = 4, the
  standard code with that constraint length.
* The coded-bit placement on the bus and the I/Q split of a symbol.
* Rectangular rather than cross constellations for 32- and 128-QAM.
* The mapper normalisation (2¹⁵/(2N) peak), the 1/N shift in the IDFT, and
  32767 as the value of 1.0.
* SRRC roll-off 0.5, two taps per symbol, and zero-phase tap placement.
* Pipeline depths: 1 + 1 + (log2 N + 2) + 2 + (log2 N + 2) + 4.
* The DDS: a 32-bit phase and a 1024-entry table.
* One generic mapper module for all QAM orders, where the original kept one
  source file per order. Only the selected order is built either way.
* Vendor arithmetic cores (multiplier, complex multiplier, adder/subtracter,
  convolutional encoder) are written out as plain RTL. The DFT keeps its
  products at full precision rather than rounding them to 16 bits.
* A coefficient-generation program is not needed. Its three outputs (filter
  bins, DFT weights, carrier table) are computed by `qam_tx_pkg` at
  elaboration.
* The uncoded setting `CODE = 1`.

Not included: a receiver, an FFT, overlap handling between blocks (see the
filter section), and run-time switching of QAM order or code rate. Like the
original, these are fixed when the design is built.
