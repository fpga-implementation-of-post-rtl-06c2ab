# Ternary polynomial multipliers for NTRU Prime encryption

Streamlined NTRU Prime encryption spends most of its time on one product:

    e(x) = h(x) · r(x) + m(x)   in   Z_q[x] / (x^n − x − 1)

Here `h` is the public key, with full-size coefficients in `[0, q)`. `r` and `m` are *small* polynomials whose coefficients are
only −1, 0 or +1. Because `r` is ternary, the product needs no multipliers.
Each coefficient of `r` either adds `h`, subtracts `h`, or does nothing, to a
suitably shifted accumulator. This RTL provides four hardware multipliers
for this product. They trade area against clock cycles:

| multiplier | idea | cycles for one product |
|---|---|---|
| TPM-I   (`tpm1`) | one coefficient of `r` per cycle | N (+1 load cycle) |
| TPM-II  (`tpm2`) | "x²-net": two coefficients of `r` per cycle | ⌈N/2⌉ |
| TPM-III (`tpm3`) | one coefficient per cycle, or three zeros at once | depends on `r` (≤ N) |
| TPM-IV  (`tpm4`) | recodes `r` into 3-bit codes that each cover 1–4 coefficients | depends on `r` |

All four are fully parallel: there is one arithmetic unit per coefficient, so N of them. The default
size is the NTRU parameter set ees401ep1: N = 401 and q = 2048, which gives 11-bit coefficients.
`ntru_prime_tpm_top` places the four side by side on shared operand
buses.

The architectures come from Xi Gao, *FPGA Implementation of Post-Quantum
Cryptography Recommended by NIST* (MASc thesis, University of Windsor, 2021).
This RTL follows that work's coefficient scanning, code tables and cycle
counts. It departs from it in where the shifting happens (next section).

## The ring, and why `h` shifts instead of `e`

Multiplying by `x` in this ring is a linear feedback shift register step.
Since xⁿ = x + 1, the top coefficient falls off the end and is added back at
positions 0 and 1:

    (x·a)_0 = a_{n-1}     (x·a)_1 = a_0 + a_{n-1} mod q     (x·a)_k = a_{k-1}

`ring_xmul` is this step, written as combinational logic. Chaining k copies gives `x^k·a`.

The original architectures drew a ring of `e` registers rotating past a fixed `h`.
The registers start at `m`, and after n rotations they are back in place. That
works for NTRUEncrypt's ring, xⁿ − 1, where a full rotation is the
identity. In xⁿ − x − 1, xⁿ is not 1. A rotating, LFSR-style `e` register would
therefore end up holding x⁻ⁿ·m + … instead of m + h·r.

This design keeps the schedule but swaps the roles:

* each `e_k` is an accumulator that stays where it is, preloaded with `m_k`
  (−1 stored as q−1);
* the `h` register is the LFSR. After j coefficients of `r` have been consumed,
  it holds `x^j·h mod (xⁿ − x − 1)`;
* in each cycle every slice adds ±(some power of x applied to h)_k to `e_k`. When a
  code consumes d coefficients, `h` moves forward by d LFSR steps.

After all of `r` has been scanned, `e = m + Σ r_j x^j h = m + h·r`, with the coefficients in natural
order. The original architectures select among neighbouring `e` registers,
for example `e_{k+2}` to skip three zeros. Here the selection is among LFSR taps of `h`
(`x·h`, `x³·h`, …). The number of selections and the cycle counts are unchanged.
The register count is also unchanged: N words of `h` plus N words of `e`.

## Coefficient codes

Ternary coefficients of `r` and `m` travel as 2-bit `trit_t` values:
`01` = +1, `00` = 0, `11` = −1. Bit 0 means "nonzero" and bit 1 means "negative", so a
unit can use bit 1 as the subtract control and bit 0 as the enable. The fourth
code, `10`, is unused on the inputs and is read as 0.

**TPM-II** takes coefficients in pairs (r_{2j}, r_{2j+1}). r_{2j} weights
`x^{2j}·h` and r_{2j+1} weights the next tap, `x^{2j+1}·h`. When N is odd, a zero
coefficient r_N is appended. The two terms and the accumulator are summed by
`mod_csa3`: a carry-save layer, one carry-propagate adder, and then subtraction of 0, q or
2q.

**TPM-III** recodes `r` on the fly, lowest coefficient first (`tpm3_encoder`):

| next coefficients | code `t` | consumed | effect |
|---|---|---|---|
| 0, 0, 0 | `10` | 3 | e unchanged, h ← x³h |
| 0 | `00` | 1 | e unchanged, h ← xh |
| +1 | `01` | 1 | e += h, h ← xh |
| −1 | `11` | 1 | e −= h, h ← xh |

Zeros are grouped only while at least three coefficients remain.

**TPM-IV** uses a 3-bit code (`tpm4_encoder`, `tpm4_au`). `t[2:1]` says how many
zeros come before the nonzero coefficient. `t[0]` is that coefficient's sign.

| next coefficients | `t` | consumed | added to e |
|---|---|---|---|
| 0, 0, 0, 0 | `000` | 4 | — |
| 0, 0, 0, then ±1 or end | `001` | 3 | — |
| 0, 0, ±1 | `010` / `011` | 3 | ±x²h |
| 0, ±1 | `100` / `101` | 2 | ±xh |
| ±1 | `110` / `111` | 1 | ±h |

The rules are checked in priority order from the bottom row up. If only one or
two zeros are left at the end, no cycle is spent on them. In the original design
this leftover count (the "phase shift") says how the rotated result must be read
back. Here `e` never rotates, so the result needs no reordering. `tpm4` still reports the
count on its `phase` output.

## Modular arithmetic

Every adder is written for a general modulus `Q`. A subtraction adds `Q − h`,
and the sum is reduced by comparing it with `Q` (and with `2Q` in `mod_csa3`). For the default
Q = 2048 = 2^11, this reduces to plain 11-bit wrap-around: it is the adder with
inverted operand and carry-in of the original arithmetic unit, and synthesis
removes the comparisons. The same RTL is correct for a prime `Q`, as NTRU
Prime itself uses. The testbenches also run with Q = 2297.

## Interface and timing

Every multiplier has the same ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | rising-edge clock; asynchronous active-low reset (control state only) |
| `start` | in | when idle: load `h`, `r`, `msg` on this edge and begin; ignored while busy |
| `h[N]` | in | M-bit coefficients, M = ⌈log2 Q⌉ |
| `r[N]`, `msg[N]` | in | `trit_t` coefficients |
| `busy` | out | high during the multiply cycles |
| `done` | out | one-cycle pulse as `busy` falls |
| `e[N]` | out | result, valid from `done` until the next `start` |
| `phase` | out | `tpm4` only: leftover trailing zeros (0–2) of the last operation |

The operands only need to be valid on the edge where `start` is taken. `busy` then stays
high for exactly the number of cycles in the table at the top. With the load
edge, TPM-I takes N + 1 cycles, which is 402 for N = 401.

`ntru_prime_tpm_top` adds no logic of its own. It shares `h`, `r` and `msg`, and gives each
multiplier its own bit of `start`, `busy` and `done`. The results come out on `e1`–`e4`,
and TPM-IV's phase value on `phase4`.

Parameters: `N` (default 401), `Q` (default 2048) and `M` (default `$clog2(Q)`).
The multipliers have been simulated at N = 37, 41, 401, 449, 677 and 1087. TPM-IV
needs N ≥ 3, so that the first code is never empty. Each parameter set needs its
own N, because the ring is fixed when the design is elaborated.

## Cycle counts measured

`tb/tb_workloads.sv` runs the comparison set of each security level. `r` has d_r
coefficients at +1 and d_r at −1, random placement, q = 2048, and the figures are averages
over 3 products:

| set | n | d_r | TPM-I | TPM-II | TPM-III | TPM-IV | published TPM-III / TPM-IV averages |
|---|---|---|---|---|---|---|---|
| ees401ep1 | 401 | 113 | 401 | 201 | ≈363 | ≈244 | 381 / 246 |
| ees449ep1 | 449 | 134 | 449 | 225 | ≈410 | ≈286 | 431 / 286 |
| ees677ep1 | 677 | 157 | 677 | 339 | ≈565 | ≈364 | 620 / 367 |
| ees1087ep2 | 1087 | 120 | 1087 | 544 | ≈646 | ≈420 | 872 / 420 |

TPM-I and TPM-II match the published counts exactly. TPM-IV matches the published
averages to within a few cycles, which is the spread of a random sample. The published
TPM-III averages come out as n minus the average number of three-zero groups:
for example, 401 − 20.3 ≈ 381 and 677 − 57 = 620. That counts one cycle saved per group.
A group takes one cycle where three single zeros take three, so each group saves two cycles.
The measured counts agree with n − 2·(groups): about 401 − 2·19 = 363. TPM-III is
therefore faster than its published figure suggests. Its hardware is unaffected.

Clock frequency and FPGA resource use have not been measured for this RTL.

## Files

| file | content |
|---|---|
| `rtl/ntru_pkg.sv` | `trit_t`, TPM-III/IV code enums, default sizes |
| `rtl/mod_addsub.sv` | (a ± b) mod Q |
| `rtl/mod_csa3.sv` | (a + b + c) mod Q, carry-save |
| `rtl/ring_xmul.sv` | one LFSR step, multiply by x modulo xⁿ − x − 1 |
| `rtl/tpm1_au.sv` … `rtl/tpm4_au.sv` | per-coefficient arithmetic units |
| `rtl/tpm3_encoder.sv`, `rtl/tpm4_encoder.sv` | on-the-fly recoding of `r` |
| `rtl/tpm1.sv` … `rtl/tpm4.sv` | the four multipliers |
| `rtl/ntru_prime_tpm_top.sv` | all four side by side |
| `tb/tb_ref_pkg.sv` | reference ring product, code-count models |
| `tb/tpm_env.sv`, `tb/wl_env.sv` | reusable checking environments |
| `tb/tb_*.sv` | one testbench per module, plus `tb_workloads` |

## Verification

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The reference
product in `tb_ref_pkg` is computed independently of the RTL: a schoolbook product into 2n−1
coefficients, then the top coefficients are folded down with x^k = x^{k−n+1} + x^{k−n}.

* The arithmetic units, `mod_csa3` and `ring_xmul` are checked against integer
  arithmetic for Q = 2048 and Q = 2297 with random operands, and the
  TPM-I/TPM-II units, `mod_csa3` and `ring_xmul` also with the extreme
  values 0 and Q−1. The encoders are checked exhaustively
  over every window of codes and every remaining-count value.
* `tb_tpm1` … `tb_tpm4` each run 24 products at N = 37, Q = 2048, and another
  24 at N = 41, Q = 2297. The patterns include all zero, all +1, all −1, zero runs of every length, random
  densities, the unused code `10`, and tails of one and two zeros. The testbenches check every coefficient,
  the exact busy-cycle count, the done pulse and the TPM-IV `phase`. They also change the inputs while the multiplier is busy,
  to show that operands are sampled only at `start`.
* `tb_ntru_prime_tpm_top` is the full-size run: default parameters, 5 products through
  all four multipliers at once, including a `start` pulse while busy, which must be ignored. It counts the
  mechanisms: odd-N padding, three-zero codes, each of the eight TPM-IV codes,
  and the one- and two-zero tails. It fails if any of them never occurs.
* `tb_workloads` is the table above. The run, including compilation, takes about two minutes.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ntru_pkg.sv tb/tb_ref_pkg.sv tb/tb_ntru_prime_tpm_top.sv \
        --top-module tb_ntru_prime_tpm_top -o sim
    ./obj_dir/sim

## What is not here

Only the encryption product is implemented. The rest of NTRU Prime is not:

* key generation, which needs inversion in R/3 and R/q;
* rounding of h·r to multiples of 3;
* hashing to a session key;
* decryption.

The original work gives these only as algorithm steps, with no hardware for them.
Operands enter and leave on N-word parallel buses. A real system would load
them through memory or a narrower port, which is not specified here.
