# Sum of residues modular multiplier (radix 2 and radix 2^K)

This RTL computes `C = A × B mod M` for word lengths of roughly 4 to 24 bits, the size of one channel of a
Residue Number System (RNS). In an RNS, a large number is held as its residues modulo a set of coprime
moduli. Products are then computed channel by channel, each with its own small modular multiplier.

Most modular multipliers reduce by *subtracting* multiples of M: the classical/SRT kind, Barrett and
Montgomery. This one reduces by *adding residues*. Whenever the partial result grows past n bits, its top
bits are cleared. What they were worth modulo M is then added back, read from a small precomputed table.
Nothing ever divides by M or estimates a quotient. The partial result stays in carry-save form for the whole
loop, so an iteration costs two carry-save adder delays and no carry propagation. The table lookup runs in
parallel with the first adder.

The architecture follows Y. Kong and B. Phillips, "Revisiting Sum of Residues Modular Multiplication". The
clocking, handshake, reset, full-reduction stage and the final step of the radix-2^K version are this
implementation's own choices (see *Departures and own choices*).

## The radix-2 iteration

Let `n = N` be the word length, and let the multiplier bits `a_i` be scanned from `i = n-1` down to `0`.
The partial result is the sum of two words, `C1` (the "sum" word) and `C2` (the "carry" word). Each word is
`n+1` bits wide. Its top two bits are `q = C >> (n-1)`, and the `n-1` bits below them are `L`.

One iteration (one clock in `sor_modmul_r2`):

```
2C1' = (C1 mod 2^(n-1)) << 1          n bits: top two bits dropped, then doubled
2C2' = (C2 mod 2^(n-1)) << 1
{T1, T2}  = CSA(2C1', 2C2', a_i·B)             T1: n bits, T2: n+1 bits
R         = ROM[q1 + q2] = (q1 + q2)·2^n mod M n bits, from the previous C1, C2
{C1, C2}  = modified CSA(T1, T2, R)            both n+1 bits
```

This is correct because doubling `C1 + C2 = (q1+q2)·2^(n-1) + L1 + L2` gives `(q1+q2)·2^n + 2L1 + 2L2`. The
first term is congruent to `R`, so `C1 + C2 ≡ 2·(previous) + a_i·B (mod M)` after every step. Each carry-save
step is exact, so nothing overflows. All widths are fixed and no value depends on how large M is.

**Why the modified adder.** The carry word `T2` of the first adder is `n+1` bits. An ordinary n-bit
carry-save adder cannot take it. The modified adder (`sor_csa_mod`) adds the low n bits of its three inputs
normally. It copies the extra top bit of `T2` straight into bit n of the sum word, because nothing else has
that weight. So the second adder takes `T2` whole: no carry-propagate adder is needed, and no multiplexer
selects between two table entries. Both output words are `n+1` bits, which gives the 2-bit `q1`, `q2`.

**Why the table has 7 entries.** Only `q1 + q2` matters, and it lies between 0 and 6. The ROM
(`sor_residue_rom`) is indexed by that sum, so it holds 7 words of n bits. A 2-bit adder forms the index. In
simulation the radix-2 loop never went above `q1 + q2 = 4`. That was tested exhaustively for n = 4 and 8 and
randomly at 24 bits. The table is still sized for the bound of 6.

## Leaving the loop: fold and reduce

After the last iteration, `C1 + C2` could be up to `n+2` bits. `sor_final_add` applies the same trick once
more, one bit lower:

```
C = (C1 mod 2^(n-1)) + (C2 mod 2^(n-1)) + ((q1+q2)·2^(n-1) mod M)     q = C >> (n-1)
```

It uses an n-bit carry-propagate adder for the two halves, a second 7-entry ROM, and an (n+1)-bit adder. The
result `c_raw` satisfies `c_raw < 2^n - 2 + M < 2^(n+1)` and is congruent to `A·B`. It can be fed back as an
operand only after one subtraction of M, because the operands must be below 2^n.

`sor_final_sub` then performs "while C ≥ M: C −= M" as an unrolled chain of compare-and-subtract stages. The
number of stages is computed at elaboration: `floor((2^n - 2 + M - 1) / M)`. That is two stages for any
modulus with its top bit set, and more for smaller moduli. Both `c_raw` and the fully reduced `c` are
outputs.

## Worked example (n = 4, A = 15, B = 11, M = 9)

This is the register contents of `sor_modmul_r2` with `N = 4, M = 9`, as checked by `sor_modmul_r2_tb`:

| iteration i | q1 q2 in | ROM residue | T1, T2 | C1 | C2 |
|---|---|---|---|---|---|
| 3 | 00 00 | 0000 | 1011, 00000 | 01011 | 00000 |
| 2 | 01 00 | 0111 (16 mod 9) | 1101, 00100 | 01110 | 01010 |
| 1 | 01 01 | 0101 (32 mod 9) | 0011, 11000 | 11110 | 00010 |
| 0 | 11 00 | 0011 (48 mod 9) | 0011, 11000 | 11000 | 00110 |

The fold keeps `000` and `110` from the two words, giving 6. It takes `q1 + q2 = 3`, whose residue is
`3·8 mod 9 = 6`. So `c_raw = 12 = 1100`, and one subtraction gives `c = 3 = 165 mod 9`.

## Radix 2^K (`sor_modmul_rk`)

Each clock consumes a K-bit digit of A (most significant first), so a product takes `ceil(N/K)` iterations
instead of N. The words are wider: `C1`, `C2` are `N+K+1` bits, `q = C >> N` is `K+1` bits, and the
adders are `N+K` bits wide. The doubled words become `(C mod 2^N) << K`. The ROM holds
`(q1+q2)·2^(N+K) mod M` in `2^(K+2) - 1` entries. The N-bit residue is zero-extended into the `(N+K)`-bit
modified adder. The digit product `a_i·B` is a K × N multiplication. The fold and reduction are the same
modules as in radix 2. The fold's tops are then `K+2` bits, so its ROM has `2^(K+3) - 1` entries.
Word lengths that are not a multiple of K are handled by zero-extending A.

## Interface and timing

Both multipliers have the same ports:

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | sampled while idle, together with `a` and `b` |
| `a`, `b` | in | N | operands, each below 2^N (b need not be below M) |
| `busy` | out | 1 | high from the cycle after `start` until `done` |
| `done` | out | 1 | one-cycle pulse; `c_raw` and `c` are held until the next result |
| `c_raw` | out | N+1 | folded result, `≡ a·b (mod M)`, `< 2^N - 2 + M` |
| `c` | out | N | `a·b mod M` |

The start edge loads the operands and clears C1 and C2. The next N edges (radix 2) or `ceil(N/K)` edges
(radix 2^K) run the iterations, and the edge after that registers the result. So `done` rises **N+1**
(radix 2) or **ceil(N/K)+1** clocks after the start edge. A `start` while busy is ignored. The critical path
of the loop is one carry-save adder plus the modified one. The residue ROM is read from registered bits and
is not in series with the first adder. The fold and the subtraction chain sit between the C registers and
the result register, and that is the longest path. If it matters, a register can be added there.

`sor_modmul_top` places the two multipliers side by side, with ports prefixed `r2_` and `rk_`. Their
parameters are shared: `N = 24`, `K = 2`, `M = 16777213` (2^24 − 3).

## Parameters and limits

* `N`: word length. The default of 24 is the widest channel the architecture was evaluated at.
* `M`: the modulus. It is fixed at elaboration because the residue tables are ROMs; it needs `1 < M < 2^N`. M
  does not need to be odd or prime. One multiplier serves one RNS channel, and another modulus needs another
  instance (or the same RTL re-elaborated). The default modulus is an arbitrary 24-bit choice.
* `K`: log2 of the radix of `sor_modmul_rk`. The default of 2 (radix 4) is an arbitrary choice. ROM size
  grows as 2^K.
* The table contents come from `sor_pkg::pow2_residue` by repeated modular doubling in 128-bit arithmetic,
  so N can go well beyond 24.

## Files

| file | |
|---|---|
| `rtl/sor_pkg.sv` | elaboration-time residue and bound functions |
| `rtl/sor_csa.sv` | W-bit carry-save adder (sum W bits, carry W+1 bits) |
| `rtl/sor_csa_mod.sv` | modified carry-save adder with one (W+1)-bit input |
| `rtl/sor_residue_rom.sv` | ROM of `(q1+q2)·2^SHIFT mod M`, indexed by `q1+q2` |
| `rtl/sor_final_add.sv` | final fold of C1, C2 into an (N+1)-bit result |
| `rtl/sor_final_sub.sv` | full reduction into [0, M) |
| `rtl/sor_modmul_r2.sv` | radix-2 multiplier |
| `rtl/sor_modmul_rk.sv` | radix-2^K multiplier |
| `rtl/sor_modmul_top.sv` | both multipliers side by side |
| `tb/*_tb.sv` | one self-checking testbench per module; `sor_mm_harness.sv` drives a multiplier |

## Verification

Every testbench compares against arithmetic done in the testbench itself (64-bit integers), checks cycle
counts where there are any, and prints `TB_RESULT checks=… failures=…`.

* `sor_csa_tb`, `sor_csa_mod_tb`: exhaustive at 4 bits and random at 24 bits. The modified adder is also
  checked against the four steps of the worked example.
* `sor_residue_rom_tb`: every entry of the 4-bit, 24-bit and 3-bit-q tables.
* `sor_final_add_tb`, `sor_final_sub_tb`: exhaustive at small N and random at 24 bits. The chain is also
  checked with a modulus below 2^(N-1).
* `sor_modmul_r2_tb`: the worked example register by register, then exhaustive products at N = 4 and 8,
  and random ones at 12, 16 and 24. Every product checks its latency, the busy/done protocol and that a
  start while busy is ignored.
* `sor_modmul_rk_tb`: exhaustive at (N, K) = (4, 2) and (8, 3), and random at (12, 2), (24, 2), (24, 4)
  and (16, 8).
* `sor_modmul_top_tb`: the top at its default parameters, 3000 products on each multiplier at once. It
  counts how often the loop residue, a large `q1 + q2`, the copied carry bit, the fold residue and zero or
  one final subtraction occurred, and fails if any never did. Two subtractions need `c_raw ≥ 2M`. At
  M = 2^24 − 3 only the single largest folded value reaches that, so the chain test covers it instead.

To run one with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv rtl/sor_pkg.sv \
          tb/sor_modmul_top_tb.sv --top-module sor_modmul_top_tb
./obj_dir/Vsor_modmul_top_tb
```

The testbenches read internal signals by hierarchical name (`dut.c1_q`, `dut.u_r2.q1`, …). Renaming those
signals means updating them too.

## Departures and own choices

* **Sequencing.** The architecture is given as a loop. The registers, counter, start/busy/done handshake,
  the asynchronous reset and the N+1-cycle schedule are this implementation's.
* **q bits.** One drawing of the architecture labels the q extraction as `2C >> (n-1)`. The algorithm text
  and the worked example instead take the top two bits of the (n+1)-bit `C` itself. This RTL does the
  latter, and it reproduces the example exactly.
* **Final fold.** One statement of the algorithm doubles `C1[0]`, `C2[0]` before the last addition. The
  worked example only masks them to n−1 bits. The RTL masks, and it reproduces the example.
* **ROM form.** Of the two table forms (16 entries addressed by `{q1, q2}`, or 7 entries addressed by
  their sum), the 7-entry form is used.
* **Full reduction.** It is an unrolled subtraction chain, and the unreduced `c_raw` is also output.
* **Radix 2^K final step.** No final step is specified for the higher-radix loop. The radix-2 fold is reused
  with wider tops.
* **Not included.** Not included are the older Tomlinson multiplier with a carry-propagate adder in the
  loop, the intermediate version with a multiplexer after the table, and the Montgomery multiplier the
  design is usually compared with. Nor is any RNS system around the channel multiplier. None of them belongs
  to this design.
