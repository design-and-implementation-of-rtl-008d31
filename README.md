# LFSR-reseeded CRC hash stream cipher

A synchronous stream cipher for small embedded hardware. It uses only
flip-flops, XOR gates and a few AND gates. An LFSR on its own is cheap but
linear: 2n output bits are enough to recover an n-bit state. A hash function
makes the output hard to invert, but feeding it fresh random input on every
iteration costs throughput. This design takes a middle path:

* an **N-bit CRC division register** (a Galois LFSR that divides by an
  irreducible generator polynomial) is iterated once per clock on its own
  previous value. Each value it takes is one N-bit keystream word;
* a **key-seeded maximum-length LFSR** feeds its state into every other CRC
  stage (the even stages), so the hash is reseeded;
* a **nonlinear Boolean function** of hash and LFSR bits feeds the remaining
  (odd) CRC stages, so the hash input is no longer linear;
* the **LFSR steps only when the new hash word shows a chosen value** (low two
  bits `00` by default). It therefore moves about one cycle in four, and the
  CRC input changes more slowly than the keystream.

Plaintext is encrypted N bits at a time as `ct = pt ^ X(t)`, where `X(t)` is
the t-th keystream word. Decryption is the same operation with the same key
and IVs. The default configuration has a 128-bit key. 8-bit and 16-bit
configurations are set by one parameter.

## One iteration

The state is the LFSR register `S` (N bits) and the hash register `X`
(N bits). With `fb = X[N-1]` (the CRC feedback bit) and `g` the generator
polynomial (bit j set when x^j is present, x^N implied), one iteration
computes

```
X'[j] = X[j-1] ^ (g[j] & fb) ^ r[j]          (X[-1] taken as 0)

r[j]  = S[j]                                   j even
r[j]  = f[j]                                   j odd

f[j]  = xr(j-2) ^ (xr(j-3) & S[j+1]) ^ (S[j+2] & fb)
        xr(k) = X[k] for k >= 0, fb for k < 0;  S indices modulo N

if X'[1:0] == 2'b00:   S' = { ^(S & p), S[N-1:1] }   (Fibonacci step)
else                   S' = S
```

Here `p` is the LFSR feedback polynomial. Without `r` this is exactly one
step of a serial CRC divider: X(t) = X0 * x^t mod g(x). Starting from a
message M with r = 0, N steps give the CRC hash M(x) x^N mod g(x). At a
stage where g has a tap, the XOR input is `S[j] ^ fb` (a linear combination
of the LFSR bit and the feedback bit) or `f[j] ^ fb`.

The keystream is X(1) || X(2) || ..., one word per clock. Before the first
iteration, `S = key ^ lfsr_iv` and `X = crc_iv`. An all-zero LFSR seed is
replaced by 0...01.

## Why f and the clocking rule are shaped this way

This is the least obvious part of the design.

The outline above fixes what feeds the CRC stages. It does not say which
hash bits the Boolean function reads, or which hash value clocks the LFSR.
Both choices decide whether the generator has long periods or collapses.

A natural alternative shows what goes wrong: take
`f[j] = X[j] ^ X[j+1]&S[j+2] ^ S[j+1]&X[j+3]` and clock the LFSR on the old
hash value. The 8-bit configuration then falls, within a few dozen clocks,
into cycles of 1 to 15 words. In some of those cycles the clocking value
never appears, so the LFSR stops for good. The cause is that one iteration
is not invertible: many hash states lead to the same next state, and
trajectories merge into short loops.

The rules used here make the whole state update a **permutation** of
(S, X). Given (S', X'), the old state can be recovered as follows:

1. The clocking decision depends only on X', so it is known. This gives S
   (either S' or one LFSR step back, and the LFSR step is invertible).
2. `X'[0] = fb ^ S[0]` gives fb = X[N-1].
3. For j = 1, 2, ..., N-1: `X[j-1] = X'[j] ^ (g[j] & fb) ^ r[j]`. Here
   `r[j]` uses only S, fb and hash bits below j-1, all of which are
   already recovered.

A permutation has no tails: every state lies on a cycle, and the loaded state
comes back after exactly one period. In the 8-bit configuration (65,280
reachable states) two seeds give periods of 29,355 and 27,199 words, that is
234,840 and 217,592 keystream bits. A maximum-length 8-bit LFSR repeats
after 255 bits. The 16-bit configuration showed no repeat within 2^20 words.

Each `f[j]` (for j >= 5) has the form `a ^ b&c ^ d&e` in five distinct
variables. Such a function is balanced and has nonlinearity 12, the highest
possible for a balanced 5-input function. For j < 5 some inputs coincide
with the feedback bit.

## Interface (`crc_stream_cipher`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1 | clock |
| `rst_n`     | in  | 1 | asynchronous active-low reset (S = 1, X = 0, outputs 0) |
| `load`      | in  | 1 | S <= key ^ lfsr_iv, X <= crc_iv; wins over `pt_valid` |
| `key`       | in  | N | secret key |
| `lfsr_iv`   | in  | N | LFSR initial state S0 (may be 0: the key alone seeds the LFSR) |
| `crc_iv`    | in  | N | initial hash value X0 |
| `pt_valid`  | in  | 1 | a word is presented; the generator iterates on this edge |
| `pt`        | in  | N | plaintext (or ciphertext to decrypt) |
| `ct_valid`  | out | 1 | high the clock after an accepted word |
| `ct`        | out | N | `pt ^ X(t)`, registered |
| `ks`        | out | N | the hash register, i.e. the last keystream word |
| `lfsr_step` | out | 1 | the LFSR steps on this clock edge |

Timing: one word per clock, latency one clock. The generator advances only
on clocks with `pt_valid` high and `load` low. With `pt_valid` low it holds,
so the sender controls the pace. To decrypt, load the same key and IVs and
send the ciphertext words in the same order.

## Parameters and polynomials

`N` is the key size, the word size and the length of both registers.
`LFSR_POLY` and `CRC_POLY` default through `sc_pkg::default_lfsr_poly(N)` and
`default_crc_poly(N)`:

| N   | LFSR feedback polynomial        | CRC generator polynomial              | origin |
|-----|---------------------------------|---------------------------------------|--------|
| 8   | x^8+x^6+x^5+x^4+1               | x^8+x^7+x^6+x^5+x^4+x^2+1             | published 8-bit configuration |
| 16  | x^16+x^15+x^13+x^4+1            | x^16+x^5+x^3+x^2+1                    | chosen here |
| 128 | x^128+x^126+x^101+x^99+1        | x^128+x^7+x^2+x+1                     | chosen here |

All six polynomials are primitive (checked by machine), so they
are also irreducible, as the CRC hash requires. For any other N, pass both
polynomials explicitly. The functions then return `x+1`, which is only a
placeholder. `CTRL_BITS` and `CTRL_VALUE` (default 2 and `2'b00`) set the
LFSR clocking value; one LFSR step per 2^CTRL_BITS iterations is expected.
`nl_bool_fn` needs N >= 8.

At N = 128 the design has 385 flip-flops: 128 LFSR, 128 hash, 128
ciphertext and 1 valid. The logic per bit is a few XORs plus two ANDs.

## What is taken from the published design and what is not

Taken from it: the overall structure (an LFSR reseeding a CRC division
circuit, with a nonlinear Boolean function), the Fibonacci LFSR with a
maximum-length polynomial seeded from the key (`S1 = Key ^ S0`), and the
CRC divider with generator-polynomial taps. Also taken: stages fed
alternately from the LFSR and from the Boolean function, the LFSR clocked
only on a chosen hash value, an N-bit key equal to the plaintext word size,
the key sizes 8/16/128, and the 8-bit polynomials.

Chosen here:

* the Boolean function and its taps;
* the even/odd assignment of stages;
* the clocking value, and the rule that the new hash word decides it;
* the 16- and 128-bit polynomials;
* one iteration per clock, with one N-bit keystream word per iteration;
* the load/IV ports, the `pt_valid`/`ct_valid` handshake and the zero-seed
  substitution;
* the LFSR is clocked through a clock enable on the main clock, not through
  a separately derived clock;
* reset is asynchronous and active low.

The published simulation waveforms also show a clear signal and some
internal buses whose role is not described. Nothing here corresponds to
them.

The published model writes the LFSR contribution as `S AND X`. The
structural description calls it a linear combination of the LFSR bit and
the CRC feedback bit, and this design follows the structural description.
The published periodicity for the 8-bit cipher (465,584 bits) is about twice
what this design reaches (about 235,000 bits). That figure depends on the
unpublished Boolean function and clocking value, so it is not expected to
match.

## How far to trust it

The RTL is checked against independent reference models. On 10^6 bits of
keystream, the ten NIST SP 800-22 tests all give p-values above 0.01 for
the fixed seed in the testbench: runs, frequency, longest run of ones, linear
complexity, approximate entropy, Maurer, cumulative sums, block frequency,
overlapping template and serial. The testbench computes these tests itself
and has not been compared with the reference suite.

Passing these tests is evidence of good statistics, not of security. In
particular:

* consecutive keystream words overlap: X(t+1) is X(t) shifted by one
  position with one bit per stage XORed in. Half of those bits come from the
  LFSR, which changes only every few clocks. An attacker who sees whole words
  sees most of the next one;
* the design has had no cryptanalysis beyond these tests.

Use it as a study of low-cost keystream generation, not as a vetted cipher.

## Files

| file | contents |
|------|----------|
| `rtl/sc_pkg.sv` | default polynomials per key size |
| `rtl/reseed_lfsr.sv` | key-seeded Fibonacci LFSR with load and step enable |
| `rtl/nl_bool_fn.sv` | the nonlinear Boolean function f |
| `rtl/crc_hash.sv` | CRC division register with LFSR/f injection; exposes `x_next` |
| `rtl/lfsr_clk_ctrl.sv` | LFSR clock enable from the new hash word |
| `rtl/crc_stream_cipher.sv` | top level: the above plus load control and the output XOR |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the two below |
| `tb/tb_keystream_period.sv` | period of the 8-bit (two seeds) and 16-bit configurations |
| `tb/tb_keystream_randomness.sv` | ten NIST SP 800-22 tests on 10^6 keystream bits at N = 128 |

`tb_crc_stream_cipher` runs the default 128-bit top end to end against a
reference model. It covers encryption with random stalls, reload during a
stream, decryption of the whole message, and an all-zero seed. It checks
that the LFSR both steps and holds. Each testbench prints
`TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/sc_pkg.sv tb/tb_crc_stream_cipher.sv --top-module tb_crc_stream_cipher -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. All of them finish within
seconds. The package must be listed first, because the other files find
their modules through `-y`.
