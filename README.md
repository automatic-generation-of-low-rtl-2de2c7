# Small fixed-point polynomial operators: 2^x and sqrt(1+x)

Two arithmetic operators that evaluate an elementary function with a
low-degree polynomial in fixed point. What makes them small is not the
evaluation structure, which is ordinary, but the numbers built into it:

* the **degree** is the lowest one that can meet the accuracy target once
  coefficient quantisation is taken into account, not the one a worst-case
  round-off estimate would ask for;
* each **coefficient** is the real minimax coefficient rounded up or down,
  the combination of rounding directions being the one that gives the
  smallest approximation error at a short coefficient size **n**;
* the **datapath** keeps **n'** fractional bits, a few more than the
  coefficients (the difference is the number of *guard bits*), just enough
  for the total rounding error to stay within the target;
* where a coefficient is close to a short signed-digit number it is replaced
  by that number, and its multiplication by shifts and additions.

The result is two operators:

| operator | domain | target error | polynomial | sizes | cycles |
|---|---|---|---|---|---|
| `horner_eval` (2^x) | x in [0,1] | 2^-12 | degree 3, Horner | coefficients 1+14 bits, n' = 16 | 3 |
| `sqrt_op` (sqrt(1+x)) | x in [0,1] | 2^-8 | degree 2, recoded, one squarer | n' = 13 | 1 |

`poly_ops_top` puts both side by side; they share only clock and reset.

## Fixed-point formats

All values are binary fixed point; "F fractional bits" means the integer
stored is the value times 2^F.

| signal | format | range |
|---|---|---|
| 2^x argument `exp2_x` (17 b) | unsigned, 1 integer + 16 fractional bits | 0 .. 1.0 (0x10000) |
| 2^x coefficients (15 b each) | two's complement, 1 integer (sign) + 14 fractional bits | |
| 2^x running value and result `exp2_y` (18 b) | two's complement, 2 integer (incl. sign) + 16 fractional bits | result in [1, 2) |
| sqrt argument `sqrt_x` (14 b) | unsigned, 1 integer + 13 fractional bits | 0 .. 1.0 (0x2000) |
| sqrt result `sqrt_y` (14 b) | unsigned, 1 integer + 13 fractional bits | [1, 1.415] |

The argument carries one integer bit so that the end point x = 1.0 is
representable. Arguments above 1.0 are outside the approximation domain and
give meaningless results. Since neither argument can be negative, they are
carried unsigned; the 2^x result is two's complement, the sqrt result
unsigned.

Every intermediate product or shifted term is **truncated** (rounded toward
minus infinity) to n' fractional bits. Coefficients are stored at their own
size and aligned to the datapath by a left shift of n' - 14 = 2 guard bits at
the adder, so the coefficient table holds 15-bit rather than 18-bit words.

## The 2^x operator (`horner_eval`)

The polynomial is

    p(x) = 8191/8192 + 2853/4096 x + 1837/8192 x^2 + 649/8192 x^3

evaluated in Horner form `p0 + x(p1 + x(p2 + x p3))`. Its approximation
error alone is 2^-13; the real minimax cubic would give 13.18 bits, and the
rounded coefficients were picked among the 16 rounding combinations to keep
13.00 bits at only 14 fractional bits. (A second combination with
p2 = 919/4096 is equally good. It can be loaded through the `COEF`
parameter, but it reaches exactly 2.0 at x = 1.0 and then needs `AW = 19`.
The default set stays below 2, at 16383/8192.)

One multiply-add unit (`fxp_mac`) is reused for all three steps:

| cycle | multiplicand | multiplier | added coefficient | writes |
|---|---|---|---|---|
| 0 (start, idle) | p3 aligned to n' | `x` input port | p2 | `acc`, `x_q` |
| 1 (busy) | `acc` | `x_q` | p1 | `acc` |
| 2 (busy) | `acc` | `x_q` | p0 | `acc`, `done` next cycle |

Step 0 needs the leading coefficient and the next one at the same time, which
is why `coef_rom` has two read ports. `horner_ctrl` holds a busy flag and a
step counter and produces the select (`first`), enables and the coefficient
index `DEGREE-1-step`.

**Handshake.** Drive `exp2_start` high for one cycle with `exp2_x` valid
while `exp2_busy` is low. `exp2_done` pulses for one cycle exactly 3 cycles
later; `exp2_y` holds the result from then until the next accepted start.
`busy` is already low in the cycle of `done`, so a new request can be given
in that same cycle: the operator sustains one result every 3 cycles. A start
while busy is ignored. An assertion in `horner_ctrl` checks that every
accepted start is answered by `done` DEGREE cycles later.

## The sqrt(1+x) operator (`sqrt_op`)

The minimax quadratic for sqrt(1+x) on [0,1] is about
`1.00076 + 0.48388 x - 0.07120 x^2`. Its coefficients are replaced by short
signed-digit numbers:

    p0 = 1
    p1 = 0.10000(-1) in binary = 2^-1 - 2^-6      (0.484375)
    p2 = -(0.0001001 in binary) = -(2^-4 + 2^-7)   (-0.0703125)

which still approximate to 9.49 bits. The only multiplier left is the
squarer; everything else is shifts and three adders:

    sq   = trunc(x * x)
    y    = 1 + ((x >> 1) - (x >> 6)) - ((sq >> 4) + (sq >> 7))

Each shifted term is truncated to 13 fractional bits. The network is
combinational and its output registered: `sqrt_out_valid` and `sqrt_y` follow
`sqrt_in_valid` by one cycle, one result per cycle.

## Accuracy

Both operators were simulated over every representable argument in [0,1]:

| operator | arguments | worst error | correct bits | target |
|---|---|---|---|---|
| 2^x | 65537 | 1.48e-4 | 12.72 | 12 |
| 2^x, alternative p2 = 919/4096 (`AW = 19`) | 65537 | 1.88e-4 | 12.38 | 12 |
| sqrt(1+x) | 8193 | 1.40e-3 | 9.48 | 8 |

These are measured figures for this RTL with truncation. The error bounds
that were proved for the two sizes are lower, 12.36 and 8.07 bits. The proofs
cover any rounding of the intermediate values, so the bounds are looser than
what simulation of one rounding mode finds.

## Reusing the Horner evaluator

`horner_eval`, `horner_ctrl`, `coef_rom` and `fxp_mac` are parameterised by
degree, coefficient size and fraction (`CW`, `CF`), datapath fraction (`NP`,
must be >= `CF`), accumulator width (`AW`), argument format (`XW`, `XF`) and
the coefficient array `COEF` (index i = power of x, in units of 2^-CF). A
degree-d polynomial then takes d cycles. You have to size `AW` for the value
range of your polynomial: the adder does not saturate.

## What is this design's own choice

The coefficients, degrees, the sizes n and n', the single squarer with
shift-and-add terms, and the cycle counts (3 and 1) are the method's. The
following are choices made here:

* the argument widths (the 2^x argument gets 16 fractional bits, the same as
  n'; the sqrt argument gets 13), the integer bits of the datapath, and
  unsigned arguments;
* reading n' as a count of fractional bits, which gives 2 guard bits for the
  2^x operator;
* truncation as the rounding of every intermediate value;
* one shared multiply-add sequenced over d cycles, and a two-port
  coefficient table;
* the start/busy/done and valid handshakes and a synchronous active-high
  reset;
* for sqrt, the adder order and the output register;
* the sqrt coefficient p2 is taken as negative, -(2^-4 + 2^-7), following the
  sign of the minimax coefficient (-0.0712); a positive value would give
  1.55 instead of sqrt(2) at x = 1.

Not included: the conventional comparison designs (a degree-4 2^x with 18-bit
coefficients, a degree-2 Horner sqrt at 11 bits), a direct (non-Horner)
evaluation variant, and the design-time search that produces coefficients
and sizes, which runs in software. Area, clock period and power were
originally measured on an FPGA. None of these are modelled here.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/poly_ref_pkg.sv`. They are integer re-implementations of both operators,
and the testbenches also compare against the real functions `$pow` and
`$sqrt`. To build and run the end-to-end test with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/poly_pkg.sv tb/poly_ref_pkg.sv tb/tb_poly_ops_top.sv \
        --top-module tb_poly_ops_top
    obj_dir/Vtb_poly_ops_top

Replace the testbench name to run another:

| testbench | what it covers |
|---|---|
| `tb_fxp_mac` | the multiply-add, including truncation of negative products |
| `tb_coef_rom` | both ports against the coefficient values |
| `tb_horner_ctrl` | step sequence, 3-cycle done, start ignored while busy |
| `tb_horner_eval` | every 2^x argument: bit-exact result, error < 2^-12, latency 3 |
| `tb_horner_eval_alt` | the same, with the alternative coefficient set |
| `tb_sqrt_op` | every sqrt argument, streamed: bit-exact result, error < 2^-8, latency 1 |
| `tb_poly_ops_top` | both operators at once, default sizes. Covers back-to-back and gapped requests, stray starts, input bubbles and the end points. It prints how often each of these happened. |

All run in well under a second.

## Files

* `rtl/poly_pkg.sv`: formats and the 2^x coefficient set
* `rtl/fxp_mac.sv`: multiply, truncate, align coefficient, add
* `rtl/coef_rom.sv`: two-port coefficient table
* `rtl/horner_ctrl.sv`: step sequencer and handshake
* `rtl/horner_eval.sv`: the 2^x operator (generic Horner evaluator)
* `rtl/sqrt_op.sv`: the sqrt(1+x) operator
* `rtl/poly_ops_top.sv`: both operators side by side
