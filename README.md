# Pipelined Reed-Solomon errors-and-erasures decoder, (31,15) over GF(2^5)

This is synthesizable SystemVerilog for a Reed-Solomon decoder that corrects
errors and erasures together. Received symbols stream in one per clock.
Decoded symbols stream out one per clock, after a fixed latency. The code is
the (31,15) Reed-Solomon code over GF(2^5): each codeword has 31 five-bit
symbols, 15 of them information. There are 16 check symbols, so up to
`s` erasures and `t` errors can be corrected whenever `s + 2t <= 16`.
An erasure is a symbol that an outside source, such as an inner
convolutional decoder, has flagged as unreliable.

The architecture follows the design in "A Single Chip VLSI Reed-Solomon
Decoder". That design has two main ideas:

* **Time-domain decoding.** The errata magnitudes come from polynomial
  evaluation (Forney's formula), and a Chien search finds the error
  positions. No inverse transform is needed. So the circuit grows with the
  number of check symbols (16), not with the code length.
* **Multiplexed recursive Euclid cells.** The key equation is solved by a
  division-free Euclid algorithm. A full systolic array would need one cell
  per step, and most of those cells would sit idle. Here one cell runs every
  step for one codeword in turn. Nine such cells, used round-robin, keep up
  with one codeword every 31 clocks.

## Decoding in seven steps

Let `X = alpha^n` be the locator of codeword position `n`. The received
symbols are `r_0 .. r_30`, and `r_0` arrives first. Each block works on one
codeword at a time, and the blocks form a pipeline.

| step | block | what it computes | cycles |
|---|---|---|---|
| 1 | `rs_syndrome` | `S_k = sum_n r_n alpha^(nk)`, k = 1..16 | 31 (streaming) |
| 2 | `rs_erasure_expand` | erasure locator `Lr(x) = prod (1 + X_i x)` over the erased positions | 31 (streaming) |
| 3 | `rs_poly_mult` | Forney syndrome `T = S * Lr mod x^16` | 18 |
| 4 | `rs_euclid_array` | error locator `lambda` and errata evaluator `Omega`, with `lambda*T = Omega mod x^16` | 276 |
| 5 | `rs_poly_mult` | errata locator `P = Lr * lambda` | 18 |
| 6 | 3 x `rs_poly_eval` | `x*Omega(x)`, `x*P'(x)` (the odd terms of `P`) and `lambda(x)` at `x = alpha^-n` for n = 0..30 | 31 (streaming) |
| 7 | `rs_correct` | `Y = x*Omega / (x*P')`, added to `r_n` where `lambda(alpha^-n) = 0` or `n` was erased | 1 |

Steps 1 and 2 share the input stream. `rs_delay_buf` holds the received
symbols and erasure flags until step 7 needs them. The top level
`rs_decoder` tags every codeword with its slot in that memory. A small table
indexed by the tag keeps `Lr`, the erasure count and the overflow flag until
step 5 needs them.

### Polynomial form

The original description writes polynomials in a variable `Z`. There the
erasure locator is `Lambda(Z) = prod (Z - X_i)` and the syndrome is
`S(Z) = sum S_k Z^-k`. This RTL keeps every polynomial in the reciprocal
variable `x = 1/Z` instead:

* `Lr(x) = x^s Lambda(1/x) = prod (1 + X_i x)`
* `S(x) = sum S_k x^(k-1)`

In this form the key equation is the familiar `lambda(x) T(x) = Omega(x)
mod x^16`, and polynomial coefficient arrays are indexed by the power of x.
The price is that roots now sit at `X^-1`. So every evaluation pipeline
multiplies cell `i` by `alpha^-i` per step, where the original uses
`alpha^i`.

The magnitude formula becomes `Y = Omega(X^-1) / P'(X^-1)`. The decoder
evaluates `x*Omega` (Omega shifted up one place) and `x*P'`. In
characteristic 2, `x*P'` is just the odd-power terms of `P`. So the
derivative costs no logic: the even coefficients are dropped.

## The recursive Euclid cell (`rs_euclid_cell`)

This is the least obvious part of the design. Each cell holds four
polynomials of 17 coefficients, plus two degrees:

* `R` and `Q`, with degrees `dR` and `dQ`
* `lambda` and `mu`

The cell starts with `(R, lambda) = (x^16, 0)` and `(Q, mu) = (T, 1)`. One
recursion is one division-free Euclid step. Let `a = lead(R)`,
`b = lead(Q)` and `l = dR - dQ`:

```
l >= 0:  R      <- b*R + a*x^l*Q
         lambda <- b*lambda + a*x^l*mu
l <  0:  R      <- a*Q + b*x^-l*R
         Q      <- old R
         lambda <- a*mu + b*x^-l*lambda
         mu     <- old lambda
```

Either way the leading terms cancel, so `dR + dQ` drops by at least one per
recursion. The invariant `lambda*T = R mod x^16` holds for both pairs
throughout.

**Coefficient-serial recursion.** A recursion handles one coefficient
index per clock, from 16 down to 0, so it takes 17 cycles. Going from the top
down means the coefficients read at `j - |l|` have not yet been overwritten.
So the swap (`l < 0`) happens in place, without a second register set. The
degree of the new `R` is found on the way: it is the first nonzero
coefficient produced. Each recursion uses two multipliers for `R` and two
for `lambda`.

**Stop test and fixed latency.** At the start of each recursion the cell
checks the degrees:

* If `2*dR < 16 + s` (or `R = 0`), the answer is `(Omega, lambda) = (R, lambda)`.
* Otherwise, if `2*dQ < 16 + s` (or `Q = 0`), the answer is `(Q, mu)`.

Here `s` is the number of erasures. With no erasures the test is
`deg < t`. A codeword with erasures but no errors has `deg T < (16+s)/2`
from the start, and is answered with `lambda = 1`. Once the test passes, the
cell freezes its registers. It always runs 16 recursions, because
`dR + dQ <= 31` falls to 15 within 16 steps. So one job takes
`1 + 16*17 + 1 = 274` cycles whatever the error pattern.

**Why nine cells (`rs_euclid_array`).** A new Forney syndrome arrives every
31 cycles, and a job takes 274 cycles. So `ceil(274/31) = 9` cells are
needed, the same as the original cell-count table for this code. The input
multiplexer deals the jobs out round-robin. A cell is reused after
`9*31 = 279` cycles, just enough. Cells finish in the same order they
started, 31 cycles apart, and the output multiplexer takes whichever cell
has finished. The sticky `overrun` output, backed by an assertion, reports a
job that found its cell still busy. That cannot happen at or below the full
input rate.

**The scale factor K.** Being division-free, the algorithm returns
`K*lambda` and `K*Omega` for some unknown nonzero `K`. The roots do not
depend on `K`, but the magnitudes need a normalised locator. The cell
reports `K = lambda(0)`. After the output multiplexer, one inverter and a
row of multipliers scale both polynomials by `K^-1`, so the output has
`lambda(0) = 1`.

## Erasure locator expansion (`rs_erasure_expand`)

A generator register starts at 1 and is multiplied by `alpha` every
position. ANDing it with the erasure bit gives a stream of `alpha^n` (erased)
and `0` (not erased). A row of 17 coefficient latches multiplies in one
factor `(1 + X x)` per nonzero input: latch `j` takes `c_j + X*c_(j-1)`, and
the lowest latch sees 0 from below. A zero input leaves the latches
unchanged. At the end of a codeword the latches are copied into output
registers, and the latches restart from `1` for the next codeword. If more
than 16 erasures are flagged, the `overflow` flag is set, and the top level
passes that codeword through uncorrected with `out_fail` high.

## Evaluation pipelines (`rs_poly_eval`) and correction (`rs_correct`)

Each evaluator has one register per coefficient, loaded with `c_i`. After
each output, register `i` is multiplied by the constant `alpha^-i`. At
position `n` it therefore holds `c_i alpha^(-i n)`, and the XOR of all the
registers is `p(alpha^-n)`. Three identical evaluators run side by side on
`x*Omega`, on the odd part of `P`, and on `lambda`. The `lambda` evaluator
is the Chien search: a zero output marks an error position.

`rs_correct` inverts the `x*P'` value (`rs_gf_inv`) and multiplies it by the
`x*Omega` value. It adds the result to the delayed received symbol wherever
`(Chien zero) OR (erasure flag)` is set. An erased symbol that happened to be
right gets `Y = 0`.

## Interface and timing of `rs_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `in_sym`/`in_era` carry a symbol |
| `in_sym` | in | 5 | received symbol, position 0 first |
| `in_era` | in | 1 | 1 = this symbol is erased |
| `out_valid` | out | 1 | `out_sym` carries a decoded symbol |
| `out_sym` | out | 5 | decoded symbol |
| `out_first` | out | 1 | marks position 0 of a codeword |
| `out_loc` | out | 1 | this position was corrected as an error or erasure |
| `out_fail` | out | 1 | codeword found uncorrectable (more than 16 erasures, or no solution); passed through unchanged |
| `overrun` | out | 1 | sticky; a Euclid job found its cell busy (input faster than the full rate) |

A codeword is 31 valid input symbols. Gaps in `in_valid` are allowed
anywhere. The first decoded symbol of a codeword appears 315 cycles after
its last input symbol. The 31 decoded symbols then follow on consecutive
cycles. At the full rate (no input gaps) the output is gap-free as well.

Parameters (`N = 31`, `D = 16`, `NCELL = 9`, `DEPTH = 16`) default to the
(31,15) code. The field itself (GF(2^5), primitive polynomial
`x^5 + x^2 + 1`) is fixed in `rs_pkg`. Only the defaults have been
simulated. A 4-bit (15,9) or 8-bit (255,223) code needs `rs_pkg`
changed. `NCELL` must be at least
`ceil((D*(D+1)+2)/N)`, and `DEPTH` must cover the latency in codewords.

## Where this RTL departs from the original architecture

* **Reciprocal polynomials.** All polynomials use `x = 1/Z`, as described
  above. The evaluators step by `alpha^-i`, and they start at position 0
  rather than pre-multiplying by `alpha^i`.
* **How K is found.** The original accumulates `K` with a recursive
  multiplier over the nonzero leading coefficients of the divisors. With the
  step used here that product does not equal the common factor of the
  results, so `K` is read as `lambda(0)` instead.
* **Where K is removed.** The original removes `K` only from the evaluator
  and passes `K*lambda` on. Here `lambda` is scaled by `K^-1` too.
  Otherwise every magnitude `Omega/(X P')` with `P = Lambda * K*lambda`
  would be off by `K`.
* **Cell count.** One sizing formula, `floor((N-I)^2/N)`, gives 8 cells.
  The cell-count table gives 9. The RTL uses 9, which the 274-cycle job
  actually needs.
* **Borrowed circuits.** The syndrome circuit and the polynomial
  multipliers were taken from earlier work and are not specified. Simple
  forms are used: per-syndrome accumulators, and a multiplier that takes one
  coefficient per cycle. The erasure locator's output registers are passed
  on in parallel and shifted out serially inside the multiplier.
* **Handshake, reset, field polynomial, delay depth, and the
  `out_fail`/`overrun` flags** are this design's own choices.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against reference arithmetic in `tb/tb_gf_pkg.sv`, which is built from
exponent and logarithm tables and written independently of `rs_pkg`.

* `tb_rs_decoder` runs the decoder at its default size on 480 random
  codewords. The first 240 are sent back to back; the rest have random
  input gaps. They carry clean, error-only, erasure-only
  and mixed patterns up to `s + 2t = 16`, overflow cases with 17 to 20
  erasures, and 200 codewords with 10 to 15 errors, beyond what the code
  corrects. The testbench checks every output symbol, the `out_loc` and
  `out_fail` flags, a constant latency, and 31-cycle output spacing at full
  rate. A beyond-capacity codeword that is flagged must pass through
  unchanged. The testbench also requires each mechanism to occur at least
  once: every Euclid cell used, Q-side answers, erased symbols that were
  right, overflow, input gaps, and a beyond-capacity codeword flagged by
  the key-equation solver. Only a few percent of those are flagged.
* `tb_rs_euclid_cell` and `tb_rs_euclid_array` check the key equation, the
  roots at the error positions, the root count, the bound on the degree of
  `Omega`, the 274-cycle latency, tag order and the normalisation.
* The other testbenches check their block against the reference: syndromes,
  locator expansion, products, evaluations, inverses, the delay memory and
  the correction stage.

To run one testbench with Verilator (here the full decoder):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rs_pkg.sv tb/tb_gf_pkg.sv tb/tb_rs_decoder.sv --top-module tb_rs_decoder
./obj_dir/Vtb_rs_decoder
```

Each testbench prints `TB_RESULT checks=N failures=M`. The full-decoder run
takes well under a second.

Limits of what is tested:

* Beyond the correction capability (for example more than 8 errors and no
  erasures), `out_fail` is raised only when the key-equation solver finds
  no valid answer. That happened for about 5% of the random patterns
  tested. The other codewords come out miscorrected or unchanged without a
  flag, as they may from any bounded-distance decoder. No extra check is
  built, such as comparing the number of Chien-search roots with the
  locator degree.
* No gate-level or timing analysis has been done. The unit multiplies
  combinationally in the same cycle as it selects coefficients, so a fast
  clock may need pipelining in `rs_euclid_cell`.
* The nMOS circuit techniques of the original (pass-transistor latches,
  dynamic registers) are not modelled. Those parts are plain flip-flops here.

## Files

* `rtl/rs_pkg.sv`: field constants and arithmetic functions
* `rtl/rs_decoder.sv`: the top level
* `rtl/rs_syndrome.sv`, `rtl/rs_erasure_expand.sv`, `rtl/rs_poly_mult.sv`,
  `rtl/rs_euclid_cell.sv`, `rtl/rs_euclid_array.sv`, `rtl/rs_poly_eval.sv`,
  `rtl/rs_gf_inv.sv`, `rtl/rs_correct.sv`, `rtl/rs_delay_buf.sv`: the
  blocks described above
* `tb/tb_gf_pkg.sv`: the reference model; `tb/tb_<module>.sv`: one
  testbench per module
