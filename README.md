# Deterministic BIST patterns from one LFSR: concatenated vs. reseeded generation

A built-in self-test has to apply a known set of ATPG test patterns to a
circuit without an external tester. Storing the patterns costs memory; the
usual remedy is to store, for every pattern, a short *seed* and let an LFSR
expand it into the full pattern. That still needs one seed per pattern, a
memory to hold the seeds, and a reseeding step before every pattern.

The idea implemented here goes one step further: write all *m* test patterns
of *n* bits one after another as a single bit string of *m·n* bits, and fit
**one** LFSR to that whole string. The LFSR then regenerates the complete
test set, pattern after pattern, from a single initial state. That state is
not stored in a memory at all: it is the set/reset value of the LFSR's
flip-flops, so a reset is all it takes to (re)start the test. The cost is a
long LFSR — its degree is close to *m·n/2* — but no seed memory and no
reseeding time.

This repository contains both generators so that they can be compared on the
same test set:

| | `concat_tpg` (concatenated) | `reseed_tpg` (reseeded) |
|---|---|---|
| LFSRs | 1, degree 156 | 12, degrees 11…22 (202 flip-flops in all) |
| seed storage | none (flip-flop reset values) | 13-word ROM, 13 × (22 + 4) bits |
| clocks for the whole set | 13 × 24 = 312 | 13 × (24 + 2) = 338 |

Both are configured for the ISCAS'89 benchmark **s349** (13 patterns of 24
bits) and produce bit-identical output.

## How an LFSR reproduces a given bit string

An external-XOR (Fibonacci) LFSR of degree *D* keeps a window of the last *D*
bits of a stream and computes the next one as a fixed linear combination over
GF(2):

    b[j] = c1·b[j-1] ⊕ c2·b[j-2] ⊕ … ⊕ cD·b[j-D]

`lfsr_fib` holds the window with the oldest bit in the MSB. Each enabled
clock the oldest bit leaves on `bit_o`, the window shifts, and the new bit
computed from the old window enters at the LSB. The stream on `bit_o` is
therefore the *D* seed bits followed by the generated bits — the target
pattern itself, if the coefficients fit.

Finding coefficients that fit is done offline with the **Berlekamp–Massey**
algorithm, which returns the shortest LFSR (smallest *D*) generating a given
finite sequence *s[0..L-1]*:

    C(x) = 1, B(x) = 1, D = 0, m = -1
    for i = 0 .. L-1:
        d = s[i] ⊕ XOR_{k=1..D} C_k·s[i-k]          (discrepancy)
        if d = 1:
            T = C;  C = C ⊕ x^(i-m)·B
            if 2D <= i:  D = i+1-D;  m = i;  B = T
    coefficients c_k = C_k (k = 1..D), seed = s[0..D-1]

For a sequence with no structure, *D* comes out near *L/2*; that is why the
concatenated LFSR for the 312-bit s349 set has degree 156. Test sets with
don't-care bits can do slightly better by choosing those bits to shorten the
LFSR (published figure for s349: 153); the s349 set used here is fully
specified, so this design uses the plain Berlekamp–Massey result.

### Encoding of the parameters

* `COEF` is `D` bits, `COEF[k-1] = c_k`: bit 0 is the tap on the youngest
  bit. Written as a binary literal it reads c_D … c_1.
* `SEED` is the first `D` bits of the target stream, **first bit in the MSB**.
* Polynomials are often printed as c_D … c_1 followed by the constant term 1;
  dropping that last character gives the `COEF` literal directly.

## `concat_tpg`: the concatenated generator

One `lfsr_fib` with `SEED` as its reset value, plus a bit counter, a pattern
counter and an *N−1*-bit serial-to-parallel register.

* `scan_bit` / `scan_valid`: one test bit per clock in which `en` is high,
  for a scan chain. `en` low stalls everything without losing a bit.
* `pattern` (first bit in the MSB), `pattern_idx`, `pattern_valid`: a
  one-clock pulse in the clock after the clock that shifted the last bit of a
  pattern. Pattern *p* therefore completes on enabled clock (*p*+1)·*N*.
* `done` rises after exactly *M·N* enabled clocks and holds.
* `restart` (synchronous) reloads the seed and clears the counters; the
  asynchronous `rst_n` does the same through the flip-flops' set/reset values.

There are no gaps between patterns: the set is one uninterrupted stream.

## `reseed_tpg` and `seed_rom`: the reseeded generator

A group of `NPOLY` LFSRs, each with its own polynomial and degree `DEG[k]`
(their reset value is zero; they are only ever loaded), and a seed ROM with
one word per pattern: the seed, right-aligned, and the index of the LFSR that
expands it. One LFSR may serve several patterns with different seeds (in the
s349 configuration LFSR 6 serves patterns 6 and 7, counting from 0).

The controller is a four-state machine (`reseed_state_e` in the package):

    FETCH  pattern number -> ROM address (synchronous ROM, 1 clock)
    LOAD   seed -> LFSR named by the ROM word; that LFSR becomes poly_sel
    RUN    N clocks: poly_sel's LFSR shifts, one test bit per clock
           -> FETCH for the next pattern, or DONE after the last one
    DONE   hold until restart / reset

so each pattern costs *N*+2 enabled clocks. `reseeding` is high in FETCH and
LOAD. The outputs otherwise behave exactly like those of `concat_tpg`. Two
assertions guard the controller: at most one LFSR shifts or loads per clock,
and the ROM only names polynomials that exist.

## The s349 configuration (`lfsr_tpg_pkg`)

| constant | value | origin |
|---|---|---|
| `S349_N`, `S349_M` | 24, 13 | benchmark geometry |
| `S349_CONCAT_COEF/SEED` | degree 156 | Berlekamp–Massey over the 13 patterns in order, computed for this design |
| `S349_DEG`, `S349_COEF` | 12 polynomials | published s349 result of the reseeding technique |
| `S349_SEEDS`, `S349_SEED_POLY` | 13 seeds | published s349 result of the reseeding technique |

The 13 test patterns are the final bit assignment published with the
reseeding result; the testbenches hold them as the expected output. Each
polynomial/seed pair was normalised to the encoding above and checked to
regenerate its pattern; the polynomial of pattern 0 (degree 12) is a
Berlekamp–Massey solution computed for this design. Seeds are as long as the
degree of their LFSR.

## Top level

`lfsr_tpg_top` places both generators side by side on one clock and reset,
each with its own `*_en`, `*_restart` and output ports (`c_*` concatenated,
`r_*` reseeded). The circuit under test and its scan chain are outside the
design; connect either generator's `scan_bit` / `scan_valid` to them.

## Using another test set

1. Concatenate the *m* patterns (fill don't-care bits first) and run
   Berlekamp–Massey on the *m·n*-bit string.
2. Instantiate `concat_tpg #(.N(n), .M(m), .D(D), .COEF(..), .SEED(..))`.
3. For the reseeded form, give `reseed_tpg` the per-LFSR `DEG` and `COEF`
   arrays (right-aligned in `DMAX` bits) and the per-pattern `SEEDS` and
   `SEED_POLY` arrays.

Requirements: *D* ≥ 2, *N* ≥ 2. The concatenated LFSR's size grows with the
test set (about *m·n/2* flip-flops plus one XOR input per nonzero
coefficient). Industrial test sets of a few million bits lead to LFSRs of
several hundred thousand stages; the RTL is written for any size but has
only been simulated up to degree 2001 (4000 bits).

## Files

    rtl/lfsr_tpg_pkg.sv   constants, s349 configuration, controller state type
    rtl/lfsr_fib.sv       Fibonacci LFSR, seed as reset value, load port
    rtl/concat_tpg.sv     concatenated generator
    rtl/seed_rom.sv       seed / polynomial-index ROM
    rtl/reseed_tpg.sv     reseeded generator
    rtl/lfsr_tpg_top.sv   both generators side by side
    tb/tb_*.sv            one self-checking testbench per module, plus
                          tb_concat_workloads / tb_reseed_workloads at
                          other benchmark sizes

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself; a
watchdog ends it with a failure if it hangs. For example:

    verilator --binary --timing --assert -Irtl \
        rtl/lfsr_tpg_pkg.sv rtl/lfsr_fib.sv rtl/seed_rom.sv rtl/reseed_tpg.sv \
        rtl/concat_tpg.sv rtl/lfsr_tpg_top.sv tb/tb_lfsr_tpg_top.sv \
        --top-module tb_lfsr_tpg_top
    ./obj_dir/Vtb_lfsr_tpg_top

What they check:

* `tb_lfsr_fib`: two published polynomial/seed pairs, taken straight from
  their printed strings, each regenerate their 24-bit pattern; the default
  degree-156 LFSR regenerates all 312 bits; hold, load and asynchronous reset.
* `tb_concat_tpg`: every scan bit and pattern of the s349 set with random
  stalls, pattern completion at clock (*p*+1)·24, `done` after exactly 312
  enabled clocks, restart in mid-set, reset.
* `tb_seed_rom`: every word against the first bits of its pattern and its
  polynomial index, random read order, one-clock latency.
* `tb_reseed_tpg`: every scan bit, pattern and the polynomial in use per
  bit; exactly 338 clocks and 26 reseeding clocks for the set; stalls and
  restart.
* `tb_concat_workloads`: `concat_tpg` at the test-set sizes of seven ISCAS
  benchmarks (s344, c6288, s208, s386, c432, c1355, s1238; 336 to 4000
  bits). Their real test sets are not included, so each gets a pseudo-random
  set of the same size, fitted at elaboration time by a Berlekamp–Massey
  constant function; every bit and pattern and the *m·n*-clock completion
  are checked. The fitted degrees (168 … 2001) land within a few of the
  published baseline LFSR sizes of the real sets (169 … 2007), i.e. at
  about *m·n*/2. Elaboration takes about half a minute.
* `tb_reseed_workloads`: `reseed_tpg` at the c432 size (28 patterns of 36
  bits, 28 LFSRs fitted per pattern, 28 seeds), with the *M*·(*N*+2) clock
  count and stalls.
* `tb_lfsr_tpg_top`: both generators end to end at the default parameters,
  with independent enables, the 312- against 338-clock application time, and
  counts of stalls, restarts, reseeds, polynomial switches, polynomial reuse
  and completions, each of which must occur.

## What is this design's own choice

The recurrence, the concatenation of the test set, the single seed held in
set/reset flip-flops, the group of LFSRs with per-pattern seeds in a ROM, and
the s349 data follow the technique this design implements. Not prescribed by
it, and chosen here: the active-low asynchronous reset, the load port, the
oldest-bit-first output order, the counters and the pattern/`done`
handshake, the serial-to-parallel register, the ROM word layout and its
registered read, and the two-clock reseed (FETCH, LOAD). The offline
polynomial search itself (Berlekamp–Massey with don't-care assignment and
polynomial-set selection) is software and is not part of the RTL.
