# Interpolation-based Chase decoder for a (4200, 4096) BCH code

This RTL decodes a binary BCH code with soft information. The code is the t = 8
(4200, 4096) BCH code over GF(2^13), and the decoder runs the Chase algorithm. The
decoder takes the eta = 4 least reliable received bits and forms the 2^4 = 16 test
vectors that flip every subset of them. A plain hard-decision BCH decoder corrects 8
errors. Chase decoding can also correct words with more errors, as long as some test
vector brings the count back to 8 or fewer.

Chase decoding usually runs a complete Berlekamp–Massey decoder for each test vector.
This design instead treats the BCH code as a subfield subcode of the (4200, 4184)
Reed–Solomon code, and decodes each test vector by algebraic interpolation. The
interpolation works on a small problem:

- The received word is re-encoded systematically, so that all but 16 positions are
  already consistent.
- Only those 16 positions, plus any flipped bit among the other positions, have to be
  interpolated.
- The correct test vector is picked with a cheap test on two symbols.
- The message bits are then recovered by a Chien search over the interpolated
  polynomials. No error-value computation is needed, because the code is binary.

A second, unrelated datapath sits beside the decoder: an 8×8 two-dimensional DFT and
inverse DFT for image blocks, built from cosine and sine matrices. It is described
near the end.

## Conventions

| item | value |
|---|---|
| field | GF(2^13), primitive polynomial x^13 + x^4 + x^3 + x + 1, alpha = 2 |
| code positions | i = 0 .. 4199, position i evaluated at alpha^i |
| RS view | (4200, 4184) RS code with generator roots alpha^1 .. alpha^16 |
| re-encoded positions | 0 .. 15, holding the RS parity phi_0 .. phi_15 |
| systematic positions | 16 .. 4199; message bit m is position 104 + m (m = 0 .. 4095) |
| BCH code | the binary words of that RS code, i.e. the t = 8 narrow-sense BCH code |
| test vector tv | 4-bit mask; bit m flips the m-th least reliable position (m = 0 least reliable) |

All field arithmetic lives in `rtl/gf_pkg.sv`:

- `gf_mul` is a loop-free shift-and-add multiplier.
- `gf_pow`, `gf_inv` and `gf_alpha_pow` are elaboration-time helpers.
- `gf_alpha_pow_var` raises alpha to a run-time exponent through a 13-entry table of
  alpha^(2^k).
- `gf_col_const` computes the column constants used below.

The constant tables of the Chien search and the generator polynomial are computed by
functions at elaboration, not stored as data.

## Data flow

```
 in_hard/in_rel (20 per clock)
      |
      +--> lrp_finder ------------- 4 least reliable positions
      +--> rs_reencoder ----------- phi_0..15, rbar_0..15 = r_i + phi_i
      +--> r_word register (4200 bits)
                 |
     for tv = 0 .. 15:
      chase_interpolator  ->  q0(x), q1(x), sf(1), sf(alpha)
      poly_select_unit (x = 1) and poly_select_unit (x = alpha)
      stop at the first tv for which both say "binary"
                 |
      codeword_recovery  (19-parallel Chien search + decision)  -> 4096 bits, 19 per clock
```

The top, `chase_bch_decoder`, sequences these stages for one word at a time.

## Re-encoding and the coordinate transformation

`rs_reencoder` runs the systematic RS encoder over the hard bits of positions
16..4199. It does 20 LFSR steps per clock, and the result is the 16 parity symbols
phi_i. The word r + phi (with phi placed on positions 0..15) is then zero on every
systematic position. On positions 0..15 it holds the symbols rbar_i = r_i + phi_i.
The error pattern of r is the error pattern of this word, shifted by the RS code word
(phi, r_16..). Decoding the RS code word nearest to r + phi therefore tells which
bits of r are wrong.

Because the systematic positions of r + phi are zero, they need not be interpolated.
Their contribution is the fixed polynomial v(x) = prod over systematic i of
(x + alpha^i). With the substitution y = v(x) z, only the points of positions 0..15
remain.

This is a shortened code (4200 < 8191). Each remaining point p therefore also carries
a column multiplier. The design folds everything into one value per point:

    z_p = value_p * alpha^p * prod_{j in P, j != p} (alpha^p + alpha^j)

Here P is the set of interpolated positions:

- P = {0..15} for a test vector that flips only positions below 16.
- A flipped position b >= 16 also joins P, with value 1, because its re-encoded value
  changes from 0 to 1.
- Such a position leaves the presolved set, which divides v(x) by
  sf(x) = prod_{b in S_F}(x + alpha^b).
- S_F is the set of flipped positions at or above 16.

`chase_interpolator` forms each z_p in 2T + ETA + 1 clocks, one factor per clock, so
there is no inverter and no table of v(x).

## Interpolation

The interpolator computes a polynomial Q(x, z) = q0(x) + q1(x) z that vanishes on the
points (alpha^p, z_p). It uses Koetter's algorithm on two candidates:

- The candidates start as g0 = 1 (weighted degree 0) and g1 = z (weighted degree
  |S_F| - 1).
- For each point, the discrepancies of both candidates come from Horner evaluation of
  their coefficient polynomials, one coefficient per clock (21 clocks).
- In one update clock, the candidate with the lower weighted degree (g0 on a tie) is
  multiplied by (x + alpha^p). The other candidate is cancelled against it.
- After the last point, the candidate with the lower weighted degree (g1 on a tie) is
  the result.

For each test vector that takes 4 + 43·P clocks, with P = 16 + |S_F| points. The
outputs q0 and q1 have NC = T + ETA = 12 coefficients. Without flipped systematic
positions the degree stays at 8 or below, and each flipped systematic position can
add one.

## Selecting the test vector

The decoded RS symbol at a re-encoded position i is cbar_i = q0(x_i) / (w_i sf(x_i)
q1(x_i)), where w_i is the column constant. The test vector is acceptable when
cbar_i + phi_i is binary at i = 0 (x = 1) and i = 1 (x = alpha). Multiplying out
gives a test without a division:

    qu * v + ql * sf * phi   is 0 or equals ql * sf,        v = 1 / w_i (a constant)

`poly_select_unit` implements this test:

- Four multiplier–register loops run Horner on the coefficient stream, highest degree
  first. Two of them give q0(omega) and q1(omega).
- The other two loops see only the odd-degree coefficients (an alternating gate
  signal). They give omega·q0'(omega) and omega·q1'(omega).
- When q1(omega) = 0, q0(omega) is zero too. By L'Hôpital's rule the ratio is then
  taken from the derivatives, and a zero test on q1(omega) switches the multiplexers
  over.
- Two multiplier stages and two comparators finish the test, and the result comes 3
  clocks after the last coefficient.
- For omega = 1 the loop multipliers are wires.

A zero ql after that switch is reported as "not binary". This guard is this design's
own choice.

The top tries test vectors in increasing mask order, so single flips of the least
reliable bits come first, and takes the first one that passes both tests. If none
passes, the hard decisions are passed through and `out_ok` is low.

**A property of this test.** Positions 0 and 1 are themselves interpolation points,
so Q passes through them, and the symbol recovered there is the interpolated value.
That value plus phi_i is the (possibly flipped) received bit, which is binary. The
test therefore rejects a test vector only in the degenerate case where q1 vanishes at
one of these two points. In practice the first test vector is almost always taken,
whatever its error count.

The end-to-end testbench shows this behaviour. It reaches the later test vectors and
the S_F paths by forcing a rejection. A stronger selection criterion would need
positions outside the interpolated set, and is not part of this design.

## Recovering the message

`codeword_recovery` evaluates q0 and q1 at the 4096 message positions, 19 per clock,
in 216 clocks. It keeps even and odd coefficient parts apart, so q(x) = even + odd and
x·q'(x) = odd. A position is in error when:

| position | condition for "bit is wrong" |
|---|---|
| not flipped | q1(alpha^i) = 0 (a root of the error locator) |
| flipped, q1(alpha^i) != 0 | q0(alpha^i) != 0 |
| flipped, q1(alpha^i) = 0 | the odd part of q0 at alpha^i != 0 |

"Flipped" means in S_F. For a flipped position the interpolation saw the flipped
bit, so the roles reverse. The output bit is the hard bit XOR the decision. The
lane constants alpha^(j·p), the step alpha^(19·j) and the start alpha^(104·j) are
computed at elaboration.

## Interfaces and timing (default sizes)

| phase | clocks |
|---|---|
| input, `in_valid`/`in_ready` handshake, 20 bits + 20×4-bit reliabilities, highest position first | 210 |
| interpolation per tried test vector | 4 + 43·(16 + \|S_F\|) |
| selection per tried test vector | about 17 |
| output, 19 bits per beat with `out_mask`, `out_index`, `out_last`, `out_ok`, `out_tv` | 216 |

Reliability is an unsigned 4-bit magnitude, where smaller means less reliable. On
ties the earlier position wins. Reset is asynchronous and active low.

## Second datapath: 8×8 two-dimensional DFT and inverse DFT

`fft2d_8x8` is a separate, unrelated circuit. It transforms 8×8 image blocks with a
regular matrix formulation instead of butterflies. Let C(u,x) = cos(pi/4 · u·x) and
S(u,x) = sin(pi/4 · u·x), and let W = C − j·s·S, with s = +1 forward and s = −1
inverse. The 2-D transform of a block X is then F = W·X·W. The inverse also scales
by 1/64.

The block computes F in two passes:

- Pass 1 forms Y = W·X, one column at a time.
- Pass 2 forms F = Y·W, one row at a time.
- Each pass runs eight complex multiply-accumulate lanes in parallel. One sample is
  broadcast per clock, and lane l adds that sample times W(l, k).
- u·x only matters modulo 8, so every coefficient is 0, ±1 or ±√2/2. A small
  function of (u·x) mod 8 produces them in Q2.14, and no ROM is needed.
- Results are rounded after each pass. With 16-bit inputs the outputs are 24 bits.

Timing per block:

- 64 load clocks (`in_valid`/`in_ready`, x-major order, `inverse` sampled with the
  first sample)
- 128 compute clocks
- the first result on the 130th clock after the last sample
- 64 results back to back, in u-major order, with `out_last` on the last

Own choices:

- the usual sign convention (e^−j forward), which matches what a standard FFT
  library computes
- the row–column order and the eight lanes
- the fixed-point format and the stream interface

Cutting images into blocks and the PSNR evaluation are left to the host.

`design_top` places the Chase decoder (`bch_*` ports) and the DFT block (`fft_*`
ports) side by side. They share only the clock and the reset.

## Where this design departs from the reference architecture

- **No pipelining across words.** The reference architecture pipelines re-encoding,
  interpolation, selection and recovery so that each stage takes about 228 clocks,
  and overlaps words. Here one word passes through the stages in sequence.
- **Per-vector interpolation.** The reference uses a unified backward–forward
  interpolator that moves from one test vector to the next by removing and adding
  single points, with about 13 clocks per iteration. Here each test vector is
  interpolated from scratch, which gives the same polynomials in more clocks: up to
  about 16 × 900 clocks per word in the worst case.
- **Latencies.** The reference gives [4184/20] + 16 + 4 clocks for re-encoding and
  12 for selection. Here the re-encoder is ready one clock after the last input beat,
  and selection takes 3 clocks after the coefficients.
- **Polynomial size.** The reference sizes q0 and q1 for degree 8. Here they have 12
  coefficients, so that flipped systematic positions cannot overflow them.
- **Own choices where the reference is silent:**
  - the primitive polynomial
  - the input and reliability formats
  - the LRP sorter (a compare-and-insert chain)
  - the test-vector order
  - the fallback when no vector passes
  - the hard-word buffer as a 4200-bit register

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog. `tb/tb_bch_pkg.sv` holds an
independent, table-based GF(2^13) model with a BCH encoder.

| testbench | what it checks |
|---|---|
| `tb_lrp_finder` | the 4 smallest reliabilities and their positions against a reference sort, with ties |
| `tb_rs_reencoder` | all 16 RS syndromes of (phi, r) are zero; rbar; a BCH code word re-encodes to rbar = 0 |
| `tb_chase_interpolator` | for all 16 test vectors, the polynomials locate exactly the wrong systematic bits; sf values; clock count 4 + 43·P |
| `tb_poly_select_unit` | the test and the derivative path at x = 1 and x = alpha, against a reference; 3-clock latency |
| `tb_codeword_recovery` | every output bit against a reference Chien search and decision rule; 216 gap-free beats |
| `tb_fft2d_8x8` | forward results within 8 LSB of a floating-point DFT for pixel and complex blocks; inverse reconstruction within 1 LSB with PSNR ≥ 35 dB; load, latency and output beat counts |
| `tb_design_top` | the whole design at its defaults: the decoder scenarios below, plus a DFT round trip running alongside them |
| `tb_chase_bch_decoder` | full default size, with these words: no errors; 8 errors spread over the word; errors on the 4 LRPs; errors on positions 0 and 1; errors in the parity part; a forced rejection of the first test vector; and a forced "no vector passes". Checks every message bit and the input and output beat counts |

`tb_chase_bch_decoder` and `tb_design_top` also count the mechanisms, and each must occur at least once:

- the L'Hôpital path at x = 1 and at x = alpha
- a rejected test vector
- a decision on a flipped systematic position
- the fallback
- for `tb_design_top`, a forward and an inverse DFT

The full-size run takes about a second of simulation.

To simulate a block with Verilator 5:

```
verilator --binary --timing --assert rtl/gf_pkg.sv tb/tb_bch_pkg.sv \
    rtl/lrp_finder.sv rtl/rs_reencoder.sv rtl/chase_interpolator.sv \
    rtl/poly_select_unit.sv rtl/codeword_recovery.sv rtl/chase_bch_decoder.sv \
    rtl/fft2d_8x8.sv rtl/design_top.sv \
    tb/tb_design_top.sv --top-module tb_design_top -Mdir obj
./obj/Vtb_design_top
```

Swap in another testbench and `--top-module` for the other blocks. Verilator reports
unused-signal warnings for the submodule outputs that the top leaves open.
