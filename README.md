# SCS-MM-New: a low-cost radix-2 Montgomery multiplier with one configurable carry-save adder

This RTL implements a radix-2 Montgomery modular multiplier for public-key
arithmetic (RSA-sized operands). It computes

    result ≡ A · B · 2^-(K+2)  (mod N)

for an odd K-bit modulus N. The design keeps its hardware small: the whole
datapath has a **single row of carry-save cells** (the CCSA) and no
carry-propagate adder. That one row does three jobs:

* It precomputes `D^ = B^ + N^`, so each Montgomery iteration adds one
  operand, not two.
* It runs every Montgomery iteration as a 3-input carry-save addition.
* It converts the final carry-save pair (SS, SC) to a plain binary number.

Two ideas keep the cycle count low despite that frugality:

1. **Configurable cells.** Each cell is either one full adder (a 3-input
   carry-save addition) or two half adders in series. In the second mode a
   clock cycle moves every carry two bit positions. The carry-propagation
   phases (before and after the main loop) therefore take half the cycles a
   plain half-adder row would need.
2. **Iteration skipping with quotient precomputation.** An iteration that
   would add zero to an even carry-save pair is only a shift by one. A small
   detector sees this one cycle ahead from the three low bits of SS and SC. It
   then folds the iteration into the next cycle's shift, which becomes a shift
   by two. The same logic precomputes the next quotient bit, so it does not
   sit on the critical path.

The architecture is the "SCS-MM-New" multiplier (semi-carry-save Montgomery
multiplication, new variant) from the published description it is taken from.
The semi-carry-save (SCS), full-carry-save (FCS) and modified SCS (MSCS)
multipliers that the description compares against are not included.

## The arithmetic behind the datapath

Plain radix-2 Montgomery runs, for each bit `A_i`:

    q_i = (T + A_i·B) mod 2 ;  T = (T + A_i·B + q_i·N) / 2

This design changes the operands so that every value the adder sees is a
multiple of 4:

* `B^ = 8·B` (B shifted left by 3).
* `N^ = N + 1` if `N mod 4 = 3`, or `N^ = 3N + 1` if `N mod 4 = 1`
  (module `nhat_gen`).
* `D^ = B^ + N^`.

Each iteration adds one `x ∈ {0, N^, B^, D^}`, chosen by `(A_i, q_i)`. Since
`B^` is even, `q_i` is just the parity of `T`. Adding `q·N^` and then dropping
the odd low bit of T (the `>>> 1` of the algorithm) is exactly the same as
adding `q·(N^ − 1)` and dividing by 2. `N^ − 1` is `N` or `3N`, a multiple of
N, so the sum stays congruent mod N. In short, the loop is an ordinary
Montgomery reduction by N or by 3N.

The factor 8 in `B^` costs three extra divisions by 2, so the loop runs
K+5 real iterations, `i = 0 … K+4`, plus a start-up iteration `i = −1` that
only primes the quotient and skip logic. The result is therefore
`A·B·2^-(K+2) mod N`. It is left **unreduced**. For `A, B < 2^(K+1)` it is
below `2^(K+2)`, and it is below 2N when N^ = N+1 and A, B < 2N.

The carry-save value is held as a pair (SS, SC). The registers hold the adder
output *before* the division by 2. The shift (by 1, by 2 after a skip, or by 0
while propagating carries) happens in the operand multiplexers on the way back
into the adder.

## Skip detection and quotient precomputation (`skip_d`)

This is the least obvious part of the design. Every x has `x[1:0] = 0`, and
`x[2] = q^ & N^[2]`. So the low bits of the next iteration's SS and SC follow
from the three low bits of the current ones:

    SS[i+1]_0 = SS1 ^ SC1           (call it d1)
    SC[i+1]_0 = SS0 & SC0           (call it d0)
    q_{i+1}   = d1 ^ d0
    skip_{i+1} = ~(A_{i+1} | d1 | d0)
    q_{i+2}   = (SS2 ^ SC2) ^ (q^ & N^[2]) ^ (SS1 & SC1)

Here `SSj` and `SCj` are bit j of SS[i] and SC[i].

`skip_{i+1} = 1` means that iteration i+1 would add `x = 0`, because
`A_{i+1} = 0` and `q_{i+1} = 0`, to a pair whose low bits are both zero. That
iteration is only a shift. In that case the next cycle shifts by 2 and
continues with iteration i+2, using `q^ = q_{i+2}` and `A^ = A_{i+2}`.
Otherwise the next cycle shifts by 1 and uses `q_{i+1}` and `A_{i+1}`.

The formula for `q_{i+2}` is exact only when the skip is taken, because only
then is the carry out of bit 0 zero. It is used only in that case. The three
flip-flops q^, A^ and skip are all reset when a multiplication starts.

Register `A` (module `a_shifter`) always presents `A_{i+1}` and `A_{i+2}`. It
advances by one or two bits per cycle and reads zeros past the operand's top
bit.

**The last iteration.** A skip at `i = K+4` would perform an iteration K+5
that does not belong to the multiplication. That halves the result and breaks
the congruence. This design therefore allows skips only up to `i = K+3`, using
the `skip_en` input of `skip_d`. A skip at `i = K+3` is legal. In that case the
loop ends with a pending shift by two, which the alignment pass applies.

## Datapath

```
        N^ reg     B^ reg     D^ reg           A reg (a_shifter)
          |          |          |                 | A_{i+1}, A_{i+2}
   SC -> [M1]     SS->[M2]    [SM3] <- q^, A^      v
   (load/>>0/>>1/>>2)  |        | ~x          +--------+
          |          |          |       SS,SC ->| skip_d |-> q^, A^, skip FFs
          +----------+----------+   low bits    +--------+
                     |                 (M4/M5)
                  [ CCSA ]  <- alpha (1: full adder, 0: two half adders)
                   |    |
                 [SC]  [SS] --> result
                   |
                [zero_d]  -> ends the carry-propagation phases
```

| Module | Role |
|---|---|
| `cfa` | One configurable cell. With alpha = 1 it is a full adder on (SS bit, SC bit, x bit). With alpha = 0 its third addend is the `a&b` of the cell below, so the row forms two serial half adders. It takes x inverted, as SM3 delivers it. |
| `ccsa` | A row of W cells. It returns sum and carry vectors, with the carry vector aligned so that `carry[0] = 0`. |
| `sm3` | Selects `x` from (A^, q^): 00 → 0, 01 → N^, 10 → B^, 11 → D^. Its output is inverted. |
| `op_mux` | M1 (SC side, or N^ when loading) and M2 (SS side, or B^). It selects the load value or the register shifted by 0, 1 or 2. Two 5-bit copies (M4/M5) feed the skip detector. |
| `skip_d` | The equations above, plus the two 2:1 multiplexers that choose the next q^ and A^. |
| `zero_d` | NOR of the SC register. |
| `a_shifter` | The A operand register. |
| `nhat_gen` | Computes N^ from N. |
| `mm_pkg` | Operand-select and state encodings. |
| `scs_mm_new` | The top. It holds the registers, the state machine and the assertions. |

The datapath width is `W = K + 6`. Every carry-save value stays below
`2^(K+6)`, so no carry leaves the top of the adder row.

## Sequence and timing

| Phase (state) | Cycles | What happens |
|---|---|---|
| `IDLE` | – | `start` loads N^ (from N), `B^ = B<<3` and A, and clears q^, A^, skip |
| `PRE` | 1 | `(SS, SC) = B^ + N^ + 0`, full-adder mode |
| `PRE_PROP` | p1 + 1 | Two-half-adder passes while `SC ≠ 0`. Then `D^ ← SS` and SS, SC are cleared. |
| `LOOP` | K + 6 − skips | Iterations `i = −1 … K+4`, full-adder mode, shifts by 1 or by 2 |
| `ALIGN` | 1 | One two-half-adder pass on the shifted loop output. This applies the final shift and leaves SS[K+5] in the register. |
| `POST_PROP` | p2 + 1 | Two-half-adder passes while `SC ≠ 0`. Then `done`. |

Latency from the `start` edge to the edge that raises `done` is
`p1 + p2 + (K + 6 − skips) + 4` cycles. Here p1 and p2 are half the length of
the longest carry chain, rounded up: a few cycles for random data, and up to
about K/2 in the worst case. With random operands about a fifth of the
iterations are skipped. Over a multiplication that is roughly 0.2·K cycles saved.

## Interface (`scs_mm_new`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock. Asynchronous active-low reset. |
| `start` | in | 1 | Sampled while idle; captures `a`, `b`, `n`. |
| `a`, `b` | in | K+1 | Operands, each below 2^(K+1) |
| `n` | in | K | Odd modulus |
| `busy` | out | 1 | High from the cycle after `start` until `done` |
| `done` | out | 1 | One-cycle pulse |
| `result` | out | K+2 | Valid from `done` until the next `start` |

The operands need not stay stable after `start`. The parameter `K` defaults to
1024.

## What follows the source and what is this implementation's own

Taken from the published architecture:

* the algorithm;
* the single configurable carry-save row and its two modes;
* `B^ = 8B`, the N^ formula and `D^ = B^ + N^`;
* the SM3 selection and its inverted output;
* the >>1 and >>2 operand taps;
* the skip and quotient equations;
* the q^, A^ and skip flip-flops reset at the start;
* the zero detector that ends both carry-propagation loops.

Chosen here, because the description leaves it open:

* the default operand length (1024 bits, since no length is given) and the
  K+1-bit operand ports;
* the start/busy/done handshake, the asynchronous reset and the state machine;
* computing N^ in hardware in front of its register (the description treats
  N^ as an input);
* clearing SS and SC in the cycle that stores D^;
* the extra alignment pass after the loop;
* forbidding a skip in the last iteration (see above);
* the cell equations. The cells are written from their function, not gate by
  gate.

Not built: the final reduction to `[0, N)`, because the multiplier returns a
congruent value as described, and the comparison designs. The published area
and power figures are for an unspecified library and operand length, so they
are not reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* `tb_cfa` tests the cell exhaustively. `tb_ccsa` checks both modes on random
  vectors and long carry chains. `tb_skip_d` is exhaustive over all 2048
  input combinations, against a bit-level carry-save step.
* `tb_sm3`, `tb_op_mux`, `tb_zero_d`, `tb_nhat_gen` and `tb_a_shifter` check
  their tables and shifts.
* `tb_scs_mm_new` is the end-to-end test at K = 48, with over 400
  multiplications including corner cases. Each result is checked three ways:
  against an integer Montgomery recurrence, for congruence with
  `A·B·2^-(K+2) mod N`, and against a word-level model of the algorithm. The
  latency must match that model cycle for cycle, and each carry-propagation
  phase must take exactly half the passes of a single half-adder stage. The
  test counts and requires each of these events: skips, a skip forbidden in
  the last iteration, a skip into it, each of the four x choices,
  propagation before and after the loop, both N^ formulas, and a
  full-length carry chain.
* `tb_scs_mm_new_full` runs the same checks at the default K = 1024, over 18
  multiplications.
* `mm_ref_pkg` holds the reference models.

To simulate with Verilator, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_scs_mm_new \
    rtl/mm_pkg.sv tb/mm_ref_pkg.sv rtl/*.sv tb/tb_scs_mm_new.sv
./obj_dir/Vtb_scs_mm_new
```

For a leaf testbench, use the same command with `--top-module tb_<module>`
and `tb/tb_<module>.sv`. The K = 1024 build takes about half a minute to
compile and a fraction of a second to run.

## Changing the design

* **Operand length:** set `K`. All internal widths follow from it.
* **Result range:** the unreduced result can be fed back as an operand if it
  fits in K+1 bits. That holds when N^ = N + 1 and A, B < 2N. A final
  conditional subtraction of N is needed to get a fully reduced result.
* **Assertions:** `scs_mm_new` asserts that the result fits its K+2 bits and
  that `start` while idle makes the unit busy.
