# Quantised Box-Muller white Gaussian noise generator

Emulating a communication channel in hardware (AWGN, and by filtering
Gaussian noise also Rice or Rayleigh channels) needs a source of Gaussian
noise that runs at clock rate, is cheap in logic, and whose output
distribution is known *exactly* so that measured bit error rates can be
trusted. This RTL implements such a generator.

The idea is to take the Box-Muller transform,

    n = sqrt(-ln x1) * sqrt(2) cos(2 pi x2),      x1, x2 uniform on (0, 1]

and replace both functions by small ROMs addressed by a few random bits.
`sqrt(-ln x1)` needs fine resolution only near `x1 = 0` (the tail of the
Gaussian), so it is quantised on a *non-uniform* grid built from several
16-word ROMs. The product of the two ROM words, truncated and given a random
sign, is a rough Gaussian sample; adding `A` of them (central limit theorem)
smooths the quantisation ripple. Because every input is a uniform draw of a
few bits, the probability of every output value can be computed exactly from
the parameters, and the testbenches do just that.

Default configuration (the one the generator was synthesised in): one sample
per clock, one output every 4 clocks, 5 ROMs of 16 x 10 bits, 1 ROM of
256 x 7 bits, a 10 x 7 multiplier, 29 random bits per clock from seven LFSRs.

## Data path

```
lfsr_bank --29 bits--+-- s_1..s_5 (20 b) -> rank_select --sel--> f_rom --f (10 b)--+
                     +-- s'        (8 b)  ----------------------> g_rom --g (7 b)---+--> box_muller --bm (11 b)--> clt_accum --> noise (13 b)
                     +-- sign      (1 b)  ---- (one register) ----------------------+
```

| stage | what happens | registers |
|---|---|---|
| 0 | LFSR states give the 29 random bits (combinational) | LFSR states |
| 1 | rank selection, ROM f_r and ROM g read, sign delayed | `f`, `g`, sign |
| 2 | product, truncation to b fraction bits, sign applied | `bm` |
| 3 | running sum of A samples | `noise`, `noise_valid` |

The first output appears A + 2 = 6 clocks after the first enabled clock,
then one every A clocks.

## Non-uniform quantisation of sqrt(-ln x1) (`rank_select`, `f_rom`)

This is the least obvious part. Five independent 4-bit random variables
`s_1 .. s_5` are drawn every clock. The first one that is non-zero decides:

* `s_1 != 0`: ROM `f_1` at address `s_1` (x1 in `[1/16, 1)`, step 1/16);
* else `s_2 != 0`: ROM `f_2` at address `s_2` (x1 in `[1/256, 1/16)`, step 1/256);
* ... and so on down to ROM `f_5` (step 2^-20).

A particular address `s` of rank `r` is therefore drawn with probability
exactly `2^(-4r)`, which is precisely the width of the x1 interval that word
stands for. In effect x1 is drawn with 20 bits of resolution near zero while
only 16-word ROMs are stored. The word of ROM `f_r` at address `s` is

    f_r(s) = floor( 2^m * sqrt( -ln( 2^(-r q) * (s + delta) ) ) )     (m = 7 fraction bits, 3 integer bits)

where `delta` (0.467 by default) places the sample point inside its
interval. q = 4 keeps each ROM at 16 words so that it fits a 4-input FPGA
lookup table per output bit.

When all five variables are zero (probability 2^-20) this design uses ROM
`f_5` at address 0, the interval nearest `x1 = 0`; the original construction
simply leaves this case out.

`rank_select` is the priority logic; `f_rom` holds the five ROMs, reads each
at its own variable `s_r` and multiplexes the selected word with the one-hot
`sel`.

## Quarter-cosine ROM and sign (`g_rom`, `box_muller`)

`g(x2) = sqrt(2) cos(2 pi x2)` is stored only for the first quarter period,
256 words of 1 + 6 bits, uniformly spaced:

    g(s') = floor( 2^m' * sqrt(2) * cos( pi * 2^-q' * (s' + delta') / 2 ) )     (m' = 6, delta' = 0.5)

The other three quarters differ only in sign, and the sign is drawn as a
separate random bit. `box_muller` multiplies the two words and drops the low
`m + m' - b` bits:

    n+ = floor( f_r(s) * g(s') / 2^(m + m' - b) )      (b = 6 fraction bits)
    bm = sign ? -n+ : n+                              (11-bit two's complement)

## Smoothing by accumulation (`clt_accum`)

`clt_accum` adds A = 4 consecutive samples and outputs the sum with a
one-clock `noise_valid` pulse. The sum of four samples of (nearly) unit
variance has standard deviation 2, so reading the 13-bit result with 7
instead of 6 fraction bits gives a unit-variance sample with no rescaling
logic. For A not a power of 4 the raw sum is output and the scale factor
`1/sqrt(A)` is left to the user.

Truncation (floor) of the ROM words and of the product makes the variance
slightly smaller than ideal: with the defaults the exact standard deviation
of the output is 0.985 (in unit-variance terms); with b = 1 it drops to
0.82. The testbenches check the hardware against these exact values, not
against an ideal Gaussian.

## Random bits (`lfsr_leap`, `lfsr_bank`)

Each LFSR is a Galois register holding `X^n mod P[X]`. Instead of one step
per clock it applies `W` steps (`X^(W n) mod P[X]`), which yields W fresh
bits per clock from a single register. `lfsr_bank` runs seven of them:

| register | length | polynomial | bits/clock | used for | word bits |
|---|---|---|---|---|---|
| 0 | 22 | X^22+X^21+1 | 4 | s' (ROM g address), low | 3:0 |
| 1 | 21 | X^21+X^19+1 | 4 | s', high | 7:4 |
| 2 | 20 | X^20+X^17+1 | 4 | s_1 | 11:8 |
| 3 | 17 | X^17+X^14+1 | 4 | s_2 | 15:12 |
| 4 | 13 | X^13+X^4+X^3+X+1 | 4 | s_3 | 19:16 |
| 5 | 7 | X^7+X^6+1 | 4 | s_4 | 23:20 |
| 6 | 15 | X^15+X^14+1 | 5 | s_5 and the sign | 27:24, 28 |

The lengths are those of the synthesised generator. The polynomials (all
primitive, full period 2^l - 1), the seeds (`1 + 5 i` for register i) and the
split of bits between the ROMs and the sign are this implementation's
choices: seven registers at 4 bits give only 28 of the 29 bits needed, so
the 15-bit register steps 5 times per clock and its fifth bit is the sign
(5 is coprime with 2^15 - 1, so its period is unchanged).

The intent behind the different lengths is that the register periods be
coprime so that the joint period is their product. With these lengths that
holds only partly (2^22 - 1 and 2^20 - 1 share the factor 3, for example); the
joint period is still far beyond any practical simulation length.

## Interface (`wgng_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous reset, active low: LFSRs to their seeds, valid flags and accumulator cleared |
| `en` | in | 1 | advance the generator; low freezes the LFSRs and ROM registers, samples already in flight complete |
| `noise` | out | B+5+clog2(A) = 13 | signed sum of A samples, b fraction bits per sample |
| `noise_valid` | out | 1 | one-clock pulse per new `noise` |

`en` and the valid pulse are additions of this implementation for use inside
a larger emulator; the original description gives the generator no handshake.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `Q` | 4 | q, address bits of each ROM f_r |
| `K` | 5 | number of ROMs f_r |
| `QG` | 8 | q', address bits of ROM g |
| `M` | 7 | fraction bits of f_r words (word = 3 + m bits) |
| `MG` | 6 | fraction bits of g words (word = 1 + m' bits) |
| `B` | 6 | fraction bits of a sample (must be <= m + m') |
| `A` | 4 | samples summed per output |
| `DELTA` | 0.467 | position of the sample point inside an x1 interval |
| `DELTAG` | 0.5 | same for x2 |

All ROM contents are computed at elaboration time from these parameters
(functions in `wgng_pkg`), so any parameter set gets correct tables. The
LFSR bank is fixed at 29 bits, so `K*Q + QG + 1 <= 29` is required (checked
by an assertion). The published quality study used `DELTA` between 0.44 and
0.467 depending on b, and 0.36 for its single-sample example; set it per
configuration.

Synthesis of the default configuration (generic, yosys): about 164 word-level
cells, 168 flip-flop bits and 2592 ROM bits (5 x 16 x 10 + 256 x 7).

## Verification

Every block has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_lfsr_leap` | bit-exact against a bit-serial model; period 127 and balance of the 7-bit register; hold with `en` low |
| `tb_lfsr_bank` | 29-bit word against seven register models for 3000 clocks; hold; bit balance |
| `tb_rank_select` | 20000 words, every rank and the all-zero word, one-hot select |
| `tb_f_rom` / `tb_g_rom` | every word against the formula evaluated in floating point; monotonicity; one-clock latency |
| `tb_box_muller` | 5000 random triples against real arithmetic; valid latency; both signs |
| `tb_clt_accum` | sums, exact valid timing, no overflow at extremes, one output per A clocks |
| `tb_wgng_top` | default parameters, 2,000,000 clocks with random `en` stalls: every output bit-exact against an independent model of the whole chain; latency 6; rate 1/4; every rank 1..5, both signs and stalls observed; variance within 2 % of the exact value |
| `tb_wgng_distribution` | five configurations side by side (b/A/delta = 6/4/0.467, 6/1/0.36, 1/2/0.44, 3/3/0.445, 8/5/0.467): histogram of up to 4,000,000 clocks of output against the exact distribution (A-fold convolution of the exact single-sample law), per value within 5 sigma, chi-square, variance |

The helper `tb/wgng_dist_check.sv` computes the exact law for one
configuration.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/wgng_pkg.sv tb/tb_wgng_top.sv --top-module tb_wgng_top -o sim
./obj_dir/sim
```

`tb_wgng_top` runs in about 2 s and `tb_wgng_distribution` in about 8 s.

## Where this implementation interprets or departs from the original

* ROM words and the product are truncated with floor; the original formula
  for f_r and the rounding of g are read by analogy with the half
  Box-Muller formula, which uses floor explicitly.
* `DELTA` defaults to 0.467, the value given for b = 6 in the quality study,
  rather than 0.36 from the single-sample example.
* Sign handling is plain two's-complement negation of `n+`.
* The all-zero case of `s_1..s_5` uses ROM `f_5` address 0.
* LFSR polynomials, seeds, bit assignment and the fifth step of the 15-bit
  register are choices of this implementation (see above).
* The pipeline registers, `en` and `noise_valid` are this implementation's.
* Not included: the channel itself (adding scaled noise to the transmitted
  signal), the Rice/Rayleigh extensions (ARMA filtering, non-linear
  operators) and the board-level measurement setup; none of them is
  specified in enough detail to build. FPGA-specific mapping (ROMs f_r in
  logic cells, ROM g in an embedded memory block) is left to synthesis.
* The original quality measure, a maximum relative error against the ideal
  Gaussian over 0..4 sigma, is not reproduced; the testbenches compare with
  the exact law of the quantised generator instead.

## Files

`rtl/`: `wgng_pkg.sv` (defaults, LFSR table, ROM formulas), `lfsr_leap.sv`,
`lfsr_bank.sv`, `rank_select.sv`, `f_rom.sv`, `g_rom.sv`, `box_muller.sv`,
`clt_accum.sv`, `wgng_top.sv`. `tb/`: one `tb_<block>.sv` per block,
`tb_wgng_distribution.sv` and its helper `wgng_dist_check.sv`.
