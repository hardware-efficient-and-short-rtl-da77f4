# Multicoset-sampling wideband spectrum sensor (SystemVerilog)

A cognitive radio needs to know which parts of a wide band are free before it
transmits. This design senses a band of width B_max split into L = 22
subbands and decides, for each subband, whether a primary user occupies it.
It never samples at the Nyquist rate: a multicoset sampler delivers
P = 8 sample streams ("cosets"), coset i taking the samples at times
(mL + c_i)/B_max, c_i = {2, 3, 7, 10, 12, 14, 19, 21}. Each coset runs at
B_max/L, so the average rate is P/L = 0.36 of Nyquist.

From these streams the sensor estimates the spatial-style covariance of the
cosets, finds its eigen-structure, estimates how many subbands are occupied
(minimum description length, MDL) and scores every subband with a MUSIC-like
statistic P_MU(k) = 1 / ||a_k^H E_n||^2, where E_n spans the noise eigenvectors
and a_k(i) = exp(j 2 pi c_i k / L) is the signature subband k leaves on the
cosets. A subband whose signature is orthogonal to the noise subspace gives a
large P_MU and is declared occupied when P_MU(k) > psi.

The RTL covers everything from the coset samples to the decisions except the
eigenvalue decomposition, which is an external unit with a defined interface
(see "The eigen-solver interface").

## Data flow and clocks

```
 x_i[m] --> SD --> CS (8 x HFCONV + coset delays) --> CM --> [EVD] --> MDL --> MUSIC --> DETECT --> pu[k]
  CLK1     |<---------------------------------- CLK2 ------------------------------------------->|
```

| stage | module | what it does | cycles (defaults) |
|---|---|---|---|
| SD | `wssr_sd` | stores NX = 50 samples per coset, raises FnSgn | 50 at CLK1 |
| CS | `wssr_cs`, `wssr_hfconv` | interpolates each coset by L, delays coset i by c_i, skips DL = 22 start-up samples | 45 until the first valid vector |
| CM | `wssr_cm` | R = (1/M) sum x_c x_c^H over M = 1024 vectors, real symmetric 16 x 16 form | 1024 |
| EVD | external | eigenvalues and eigenvectors of the 16 x 16 matrix | 900 assumed |
| MDL | `wssr_mdl`, `wssr_sort`, `wssr_loglam` | N-hat | 52 |
| MUSIC | `wssr_music`, `wssr_mu` | P_MU(k) for all 22 subbands | 68 |
| DETECT | `wssr_detect` | pu[k] = P_MU(k) > psi | 1 |

From the first CLK2 cycle to the decision the run takes 2089 CLK2 cycles
(the published design states 2112). The sensing time is therefore
NX/f_clk1 + 2089/f_clk2; with f_clk1 = 300 MHz and f_clk2 = 150 MHz that is
0.17 us + 13.9 us = 14.1 us.

The sample store is the only part that must keep up with the sampler, so it
alone runs at CLK1 (which must equal the coset rate). When it is full, FnSgn
moves the whole sensor onto CLK2 through `wssr_clkgen`. That block divides
`clk_fast` by two to make CLK2 and switches with a glitch-free clock
multiplexer: each clock's enable is changed on that clock's falling edge, and
only after the other enable has been seen low. During the hand-over the
sensor clock stays low for up to two periods of each clock.

## The sample store (SD)

Each coset has a row of NX one-data-store cells (a 32-bit register plus a
hold multiplexer). While FnSgn is low the rows shift in a new sample every
cycle, and a modulo-NX counter counts the cycles with `en` high. After NX of
them FnSgn rises. From then on the row input is the row's own output, and
the cells hold unless NxtSgn is high (cell select = FnSgn XOR NxtSgn). Every
NxtSgn pulse therefore rotates the row by one place and shows the next
stored sample at the output `d`. Present a valid sample on every `en` cycle:
the store keeps the last NX samples it saw.

## Interpolation without the zeros (CS and HFCONV)

To line the cosets up on the Nyquist grid, each coset would normally be
up-sampled by L (L-1 zeros between samples) and low-pass filtered to one
subband width, [0, B]. Most of the products in that convolution are with
zeros. The HFCONV unit skips them. The filter has H = 2L taps, so every
output x_h[iL + j] (0 <= j < L) needs only two products:

    x_h[iL + j] = x[i] * h[j] + x[i-1] * h[L + j]

The CS block holds sample x[i] at the HFCONV input for L cycles. Counter-1
steps j and selects h_r = h[j] and h_l = h[L + j] from two L:1 coefficient
multiplexers. Both products are formed every cycle:

* `x[i]*h[j]` enters a chain of L registers;
* `x[i]*h[L+j]` enters a chain of 2L registers.

L cycles after `x[i]*h[j]` was formed, it leaves its chain together with
`x[i-1]*h[L+j]`, which was formed 2L cycles earlier. Their sum is x_h[iL+j].
The sums are cut back to 16 bits (bits [30:15], truncation) and registered.
The result is one interpolated sample per cycle, with x_h[n] appearing
n + L + 1 cycles after the first CLK2 cycle.

NxtSgn is a registered flag that is high while Counter-1 holds L-1, so the
SD block moves to the next stored sample exactly when j wraps. After NX
samples (NX*L cycles) the interpolators get zeros.

Behind each HFCONV a chain of c_i registers forms x_c,i[n] = x_h,i[n - c_i].
This undoes the coset's sampling offset, so all eight streams carry the same
time index. Counter-2 counts cycles from the first CLK2 cycle. From count
L+1 (the first valid x_h) the delay lines take the HFCONV outputs; before
that they take zeros. `enb` is high from count H+1 = 45, which skips the
first DL = (H+1)/2 = 22 samples of filter start-up, until the last
interpolated sample (NX*L - DL = 1078 vectors). The covariance unit uses the
first M = 1024 of them.

The filter is h[n] = hr[n] exp(j pi n / L): a real low-pass with cut-off
1/(2L) cycles/sample, shifted up by half a subband so that it passes
[0, 1/L]. The coefficients are in `wssr_pkg` (`H_COEF`), with the formula.
This RTL uses a 44-tap Hamming-windowed sinc. The published design used a
constrained least-squares design of the same length and cut-off. To use
other coefficients, replace the table.

## Covariance (CM)

`wssr_cm` runs 36 complex multiply-accumulators in parallel, one for each
entry on or above the diagonal of the 8 x 8 Hermitian R. It takes one x_c
vector per `enb` cycle, so M vectors take M cycles. It then presents
S = [Re R, -Im R; Im R, Re R], a 16 x 16 real symmetric matrix whose
eigenvalues are those of R, each appearing twice. Entries are in Q.30, the
format of the product of two Q1.15 samples. The division by M is a shift, so
M must be a power of two. `done` and `evd_start` mark completion, and S
stays constant afterwards.

## The eigen-solver interface

The top brings the eigen-solver's connections out as ports:

* `evd_start` (pulse): `evd_mat` is ready and stays constant.
* `evd_done` (pulse): the solver's results are on its two outputs, held
  until the run ends:
  * `evd_lambda[j]`: the 16 eigenvalues, as 16-bit unsigned integers in any
    common scale (MDL is scale-invariant);
  * `evd_vec[j][e]`: unit-norm eigenvector j, in Q1.15.

The complex eigenvector of R is read as elements 0..7 (real part) plus j
times elements 8..15. Each eigenvalue of R comes as a pair of real
eigenvectors of S, and either one gives the same |a_k^H w|. The MDL block's
sort index picks the first copy of each pair. Any solver meeting this
interface can be connected. The system test uses a double-precision cyclic
Jacobi model with a 900-cycle latency (`tb/tb_evd_model.sv`).

## Model order (MDL)

With lambda_1 >= ... >= lambda_8 the eight distinct eigenvalues, the block
evaluates, for r = 1..7,

    mdl_r = -M * sum_{i>r} log10(lambda_i) + M(P-r) * log10(sum_{i>r} lambda_i) + C_r
    C_r   = r(2P-r)/2 * log10(M) + M(P-r) * log10(1/(P-r))

This is the usual MDL criterion rewritten so that only two running sums and
their logarithms are needed. N-hat is the r with the smallest |mdl_r|.

The hardware works in these steps:

1. A Batcher odd-even merge-sort network orders the 16 inputs and keeps
   every other value.
2. One accumulator (REG-A) sums lambda_8, lambda_7, ... lambda_2. A shift
   chain behind it captures the partial sums S_7 .. S_1.
3. Seven CORDIC log units take log10 of lambda_2..8.
4. The same accumulator sums those logs into L_r, while the log units work
   on the S_r.
5. A two-stage pipeline forms -M*L_r, B_r*log10(S_r) (B_r = M(P-r)) and
   C_r, and keeps the minimum.

The whole block takes 52 cycles.

`wssr_loglam` normalises its input to 2^e * m, with m in [1,2). It computes
ln m = 2 atanh((m-1)/(m+1)) with 16 hyperbolic CORDIC iterations (shifts
1..14, with 4 and 13 repeated), then returns (e ln2 + ln m) log10(e) in
Q.12. It is accurate to 3 LSB.

## MUSIC statistic and decision

Counter1 steps the eigenvector element and Counter2 the eigenvector, from
the largest eigenvalue down: 64 cycles. Eigenvectors with index below N-hat
(the signal subspace) are replaced by zeros. Each of the 22 MU sub-blocks:

1. multiplies the element by conj(A(i,k)) and sums over the eight elements
   (REG1/REG2);
2. squares the sum into REG3 (Q4.12);
3. adds REG3 into REG4;
4. finally divides: P_MU = 2^20 / REG4, in Q8.8, saturating at 0xFFFF.

The steering entries come from a 22-entry twiddle table:
A(i,k) = TWIDDLE[(c_i k) mod L]. `wssr_detect` registers
pu[k] = P_MU(k) > psi, with psi also in Q8.8.

## Number formats

| quantity | format |
|---|---|
| samples, filter taps, eigenvector elements, steering entries | 32-bit complex: real part in bits [31:16], imaginary part in [15:0], each signed Q1.15 |
| interpolator products | 64-bit complex, Q2.30 parts |
| covariance entries | signed 32-bit, Q.30 |
| eigenvalues | 16-bit unsigned |
| logarithms, L_r | signed 19-bit, 12 fraction bits |
| mdl_r | signed 40-bit, 12 fraction bits |
| P_MU, psi | 16-bit unsigned Q8.8 |

## How far to trust it, and where it departs from the published design

Every block has a self-checking testbench against values worked out
independently: bit-exact integer models where the arithmetic is defined, and
real-arithmetic references with stated tolerances for the logarithms and
MDL. `tb_wssr_top` runs one complete sensing operation at the default sizes.
Its input is three tones in subbands 4, 11 and 16, plus noise. It checks
the following:

* the load and clock hand-over;
* the NxtSgn and enb counts;
* N-hat;
* that the occupied subbands are flagged and carry the three largest P_MU;
* every P_MU against a real-arithmetic recomputation from the solver's
  eigenvectors;
* the latency.

Where this design's choices differ from, or fill gaps in, the published
description:

* **Coset delays** follow c_i = {2,3,7,10,12,14,19,21}. A second list
  printed for the delay registers ({2,3,7,9,11,13,19,21}) contradicts the
  algorithm and is not used.
* **Coefficient routing**: h[0..L-1] feed the short (L-register) chain and
  h[L..2L-1] the long one. The description only names the two multiplexers,
  not the chain lengths; this split is the one that yields the convolution.
* **MDL minimum** is a true comparison over r = 1..7. The description also
  contains the claim that mdl_7 is always the smallest; that is not
  assumed.
* **MUSIC noise subspace** is eigenvector index >= N-hat, counted from 0.
* **Schedules**: MDL takes 52 cycles (64 in the published timing) and MUSIC
  68 cycles (p(p-1)+2 = 58 published). The total is 2089 CLK2 cycles against
  2112.
* **Chosen details**: the clock multiplexer is glitch-free rather than a
  plain 2:1 multiplexer. The MU divider, the internal widths and the
  truncation points are this design's own choices.
* **The eigen-solver is not included.**

Two properties of the algorithm itself show up in simulation and are worth
knowing:

* **N-hat comes out high.** The 1024 covariance vectors are interpolated
  from only NX = 50 samples per coset, so they are far from independent. The
  noise eigenvalues then spread widely, and MDL with M = 1024 tends to
  over-estimate N-hat. In the system test it returns 7 for 3 tones.
* **Neighbouring subbands can be flagged.** The 44-tap interpolation filter
  has a transition band about as wide as a subband. Energy therefore leaks
  into the neighbouring subbands' signatures, and neighbours of occupied
  subbands can also pass the threshold.

The occupied subbands nevertheless produce the largest P_MU values by a wide
margin. Choose psi with this in mind.

A second system test, `tb_wssr_top_bands`, senses three band-limited signals
rather than tones. Each is 37.87 MHz wide, and they are centred at 181.77,
395.4 and 586.98 MHz within an 833.3 MHz span, which is the published
demonstration's signal. Those bands cover subbands 4-5, 9.9-10.9 and 15-16,
so the test expects subbands 4, 10 and 15 to be flagged, and they are, with
P_MU saturated. Their direct neighbours are flagged as well.

## Parameters and sizes

`wssr_top` has two parameters:

* `NX` (default 50): samples stored per coset.
* `M` (default 1024): covariance length, a power of two.

The interpolator delivers NX*L - DL vectors, so NX*22 - 22 >= M is required.
With M = 1024 that means NX >= 48. A smaller NX never completes the
covariance.

P = 8, L = 22 and the offsets c_i live in `wssr_pkg`. So do the tables that
depend on them: `H_COEF`, `TWIDDLE` and `C_R`, the last also depending on M.
Changing P, L or c_i means regenerating those tables from the formulas given
in the package comments. The sub-blocks take P, L, NX and M as parameters
for that purpose.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N
failures=F` and stops, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/wssr_pkg.sv rtl/*.sv \
    tb/tb_evd_model.sv tb/tb_wssr_top.sv --top-module tb_wssr_top
./obj_dir/Vtb_wssr_top
```

Block testbenches work the same way: replace the testbench file and the top
module. The Jacobi model is needed only by `tb_wssr_top`. The package must
come first on the command line. The full system run at the default sizes
simulates in a few seconds.

| testbench | block |
|---|---|
| `tb_wssr_top` | whole sensor, one run at default sizes: three tones |
| `tb_wssr_top_bands` | whole sensor at default sizes: three 37.87 MHz bands at 181.77, 395.4 and 586.98 MHz in an 833.3 MHz span |
| `tb_wssr_sd`, `tb_wssr_cs`, `tb_wssr_hfconv`, `tb_wssr_cmul` | sample store, convolution stage, interpolator, multiplier |
| `tb_wssr_cm` | covariance |
| `tb_wssr_sort`, `tb_wssr_loglam`, `tb_wssr_mdl` | sorter, CORDIC log, MDL |
| `tb_wssr_mu`, `tb_wssr_music`, `tb_wssr_detect` | MU sub-block, MUSIC stage, decision |
| `tb_wssr_clkgen` | clock divider and switch |
