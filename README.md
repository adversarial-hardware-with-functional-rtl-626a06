# Cash-flow interest-rate solver with a camouflaged MSDF adder

This is a fixed-point hardware solver for the interest rate of a cash flow.
Inside it, one ordinary adder has been swapped for a most-significant-digit-first
(MSDF, "online") adder. The swap is a hardware Trojan that hides in plain sight.

The solver finds the rate `x` as a root of the cash-flow polynomial

    f(x) = c0 + c1·x + c2·x² + … + c11·x¹¹

by Newton's method, `x ← x − f(x)/f'(x)`, starting from `x(0) = 0`. Every adder,
multiplier and divider in the datapath detects overflow. The OR of these flags is
the solver's **warning**. An extreme set of payments drives the datapath out of
range, and the warning tells the user not to trust the rate.

The Trojan replaces one two's-complement adder, the accumulator through which the
payments enter, with an online adder built from redundant signed digits. For every
pair of operands it produces the same 32-bit word as the adder it replaces, so no
functional test of the results can tell them apart. But its result has one more
digit of range, so it has no overflow condition and never raises a flag. When the
payments overflow that adder, the wrapped word flows on as before, but the warning
stays low. The user is then shown a rate that is plainly wrong, with nothing to say
so. Both adders are legitimate arithmetic cores with the same function, which is
the *functional camouflage*. Choosing a site that is rarely exercised is the
*topological camouflage*. That choice is made offline and appears here only as a
parameter.

## What the Trojan changes, and what it does not

The effect of the Trojan is narrow, so it is worth stating exactly:

| | requested design (`HACK_SITE = HACK_NONE`) | camouflaged design (`HACK_SITE = HACK_F`, default) |
|---|---|---|
| words computed by every unit | low 32 bits of the exact result | identical |
| overflow of the f(x) accumulator | sets `ovf_src.add_f`, raises `warning` | not detected |
| overflow anywhere else | raises `warning` | raises `warning` |
| `x_out` on every iteration | printed | identical |

So the camouflaged solver prints the same numbers as the requested one. The
difference is that, for payments whose only overflow is in the f(x) accumulator,
the requested solver flags those numbers as invalid and the camouflaged one does
not. The testbenches include such a payment set (case 3 below).

## The online adder

An online adder works on signed-digit numbers. Each radix-2 digit is in
{−1, 0, 1} and is held as two bits (borrow-save form): digit = `p − n`. The
redundancy removes the carry chain: result digit k depends only on operand
digits k, k−1 and k−2. The delay is therefore two full adders whatever the word
width, and the adder can run most significant digit first with an *online
delay* of 2.

Each digit position k holds two full adders (`online_adder_par`):

    level 1:  FA(xp[k], ~xn[k], yp[k])       → carry h[k+1] (positive, to position k+1)
                                               sum   → gn[k] = ~sum (negative weight)
    level 2:  FA(h[k], ~gn[k], ~yn[k])        → sum  s[k]          (positive)
                                               carry → cn[k+1] = ~carry (negative, to k+1)
    result:   zp = {h[M], s[M-1:0]},   zn = {cn[M:1], 0}     (M+1 digits)

The inversions are bias tricks. A full adder only adds positive bits, so a
negative bit `b` enters as `1 − b`, and the constant this adds is cancelled by
reading the inverted sum or carry as a negative digit. Summed over all positions
the identity is exact, Σ(x+y)·2^k = Σ(zp − zn)·2^k, and the top digit
z[M] = h[M] − cn[M] holds what a two's-complement adder would lose as overflow.

`online_adder_serial` is one such position with registers between the levels,
taking one digit pair per cycle, most significant first. The level-1 adder of
the digit entering now supplies the carry that the previous digit's level-2
adder was waiting for. The output in the cycle after the first input digit is
the extra top digit, and the last digit leaves two cycles after the last input
digit. The caller feeds two zero digits to flush. `in_first` marks the first
digit of a new operand and discards any state a previous, unfinished operand
left behind. The parallel adder is M copies of this cell with the registers
removed.

`msdf_adder` is the drop-in replacement for `lsdf_adder`. It recodes each 32-bit
two's-complement operand into signed digits without any gates. The low 31 bits
become positive digits, and the sign bit becomes a negative digit of weight
2³¹. Subtraction swaps the two digit vectors of `b`. The adder then adds, and the
result is converted back to two's complement with one subtraction `zp − zn`. The
output `sum_full` (33 bits) is always the exact result. `sum` is its low 32 bits,
which is what the 32-bit datapath takes.

## The solver datapath

`cashflow_newton` is built from these units:

- **Coefficient store**: N = 12 words, written one per cycle while the solver is idle.
- **`horner_eval`**: computes f and f' together by Horner's rule, one coefficient per cycle:
  `d ← d·x + b`, then `b ← b·x + c_i`, for i = N−2 … 0, starting from b = c(N−1) and d = 0.
  It has two `fx_mul` and two adders. The f adder (`b` accumulator) is the Trojan's
  default site.
- **`fx_div`**: restoring division over magnitudes, one quotient bit per cycle,
  `q = trunc(f·2^F / f')`. It flags a quotient that is out of range, and a zero divisor.
- **Update subtractor**: `x − q`.

Numbers are Q16.16: 32-bit two's complement with 16 fractional bits, so the range
is ±32768. Multipliers truncate toward −∞ and the divider rounds toward zero.

The solver outputs every iterate. Each one carries the warning accumulated since
`start`. `ovf_src` says which units have overflowed, using these bits:

| bit | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| unit | update | divide by 0 | divider | f' multiplier | f' adder | f multiplier | f adder |

### Timing

| step | cycles |
|---|---|
| Horner evaluation | N − 1 = 11 |
| division | W + F + 1 = 49 |
| update | 1 |
| hand-over between units | 4 |
| **one iteration** | **N + W + F + 5 = 65** |

The first `iter_valid` comes 65 cycles after the cycle that samples `start`, and
then one comes every 65 cycles. `done` pulses with the eighth. A full solve takes
520 cycles. `coef_we` is ignored while `busy` is high.

### Choosing the site: `HACK_SITE`

The Trojan's site is meant to be an adder that matters little to the rest of the
circuit. The intended way to find one is betweenness centrality on the circuit
graph. The betweenness of an edge is the fraction of all shortest paths between
node pairs that pass through it. Edges at or below a threshold ε are short-listed
as rare. This analysis runs on a netlist at design time, so it is not part of the
RTL. Its result is the `HACK_SITE` parameter (`cf_pkg::hack_site_e`):

- `HACK_NONE`: all adders are `lsdf_adder`.
- `HACK_F`: the f accumulator is the Trojan site. This is the default.
- `HACK_D`: the f' accumulator is the Trojan site.
- `HACK_UPD`: the update subtractor is the Trojan site.

## What the example payment sets do

The payments are the two example cash flows, c0 … c11:

- Usual: −2016.0, 6921.9, 3133.2, 1008.5, 51.1, 132.6, 87.6, −34.9, −10.4, −2.4, −0.5, −0.1
- Extreme: −17333, 16567, 8471, 7432, 6812, 6571, −6739, 5538, 4871, −4372, −3970, −3658

With the default top level, starting at x = 0:

| iteration | 1 | 2 | 3 | 4 | 5–8 | warning |
|---|---|---|---|---|---|---|
| usual payments | 0.291245 | 0.258926 | 0.258453 | 0.258453 | 0.258453 | never |
| extreme payments | 1.046234 | 0.214157 | 0.831894 | −2.098969 | … 42.234680 | from iteration 2 |
| case 3: 11180, −17464, 29642, −10723, 0 … | 0.640167 | −0.637787 | −1.326904 | −1.147598 | −1.154526 | **never** (requested design: from iteration 2) |

- **Usual payments.** The solver reaches the real root 0.258442 to within the
  Q16.16 resolution, and neither design warns.
- **Extreme payments.** The polynomial has two real roots, 0.6335 and 1.2143.
  Newton's method from 0 does not converge to either of them in exact arithmetic
  either. In Q16.16 the second iteration overflows the f accumulator, the f'
  adder and the f' multiplier all at once. The camouflaged adder hides its own
  overflow, but the others still raise the warning. This Trojan alone hides the
  warning only when the f accumulator is the unit that overflows.
- **Case 3.** This payment set was chosen so that the f accumulator is the only
  unit that overflows (six times over the eight iterations). The requested design
  warns. The camouflaged one settles on −1.1545 with no warning, yet
  f(−1.1545) ≈ 87 000 and the polynomial's only real root is 2.2459.

## How far this follows its source, and where it departs

These parts follow the published description:

- The idea of replacing a two's-complement adder with an online adder of the same
  function and a wider range.
- The radix-2 online adder with two full-adder levels and no carry chain, in a
  serial form and a parallel form derived from it.
- The Newton solver for the cash-flow polynomial, with a warning for extreme
  payments.
- 12 payments, 8 iterations and a start at 0.
- Using the example payment sets.

These are this design's own choices:

- **The datapath structure.** The original datapath is known only as a figure
  caption: "a datapath of the cash-flow analysis" with several adders, one of
  them hacked. Horner evaluation, a sequential divider and a separate update
  subtractor are choices made here. So are the Q16.16 format, the rounding, the
  schedule and all handshakes.
- **Which adder is hacked.** This design picks the f accumulator.
- **The published iterates are not reproduced.** Those values depend on the
  original number format and datapath, which are not known. The published
  discussion also swaps "displayed" and "true" between its text and its table.
  This README uses the reading in which the hacked design displays the value
  near 1.214 and the true rate is 0.6335.
- **The online adder's range.** This design reads the extra range as one more
  integer digit in the result.
- **Overflow detection in every unit.** This design reports overflow from
  multipliers and the divider too, not only from adders. That is why the extreme
  payment set still warns here.
- **The serial online adder.** It has no role in the solver and stands beside it
  in `camouflage_top` with its own ports.

## Files

| file | contents |
|---|---|
| `rtl/cf_pkg.sv` | `hack_site_e`, `ovf_src_t`, full-adder function |
| `rtl/camouflage_top.sv` | top: solver + serial online adder |
| `rtl/cashflow_newton.sv` | the solver (coefficient store, FSM, update, warning) |
| `rtl/horner_eval.sv` | f and f' by Horner's rule |
| `rtl/lsdf_adder.sv` | two's-complement adder/subtractor with overflow flag |
| `rtl/msdf_adder.sv` | camouflaged adder/subtractor around the online adder |
| `rtl/online_adder_par.sv` | digit-parallel radix-2 online adder |
| `rtl/online_adder_serial.sv` | digit-serial radix-2 online adder |
| `rtl/fx_mul.sv`, `rtl/fx_div.sv` | Q16.16 multiplier and divider with overflow flags |
| `tb/cf_ref_pkg.sv` | bit-accurate reference model of the solver (64-bit integers) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own. A
watchdog counts a failure if a testbench hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/cf_pkg.sv tb/cf_ref_pkg.sv tb/tb_camouflage_top.sv \
        --top-module tb_camouflage_top -o sim
    ./obj_dir/sim

Replace `camouflage_top` with `cashflow_newton`, `horner_eval`, `msdf_adder`,
`online_adder_par`, `online_adder_serial`, `lsdf_adder`, `fx_mul` or `fx_div` to
run the others. Each testbench runs in well under a second.

- `tb_camouflage_top` runs the top with its default parameters. It solves the
  usual, extreme and case-3 payment sets, then zero payments, a near-zero slope
  and a start near the top of the range. Meanwhile it runs 100 serial online
  additions. It checks every iterate, the warning sources and the 65-cycle
  period.
- `tb_cashflow_newton` runs all four `HACK_SITE` variants side by side on 18
  payment sets, 12 of them random. It compares every iteration with the
  reference model.
- The unit testbenches compare against exact integer arithmetic. They also check
  the online-delay property of the parallel adder: changing digits below k−2 must
  not change result digits k and above.

## Changing it

- `N` (number of payments), `ITER`, `W` and `F` are parameters of
  `camouflage_top` and `cashflow_newton`.
- The testbench reference model `cf_ref_pkg` is written for Q16.16. Change its
  `W`/`F` constants and its wrap/shift code along with the RTL.
- The iteration period stays N + W + F + 5 cycles.
- `online_adder_par` and `msdf_adder` work for any width ≥ 2.
- To build the requested, Trojan-free solver, set `HACK_SITE = HACK_NONE`.
