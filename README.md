# Radix-16 continued-product arithmetic engine

This is synthesizable SystemVerilog for an arithmetic engine that computes four functions of
fixed-point fractions with one shared method:

- quotient Y/X
- product Y·X
- natural logarithm ln X (+ Ex·ln 2 for a floating-point exponent Ex)
- exponential e^X

Each clock cycle yields one radix-16 digit, i.e. four result bits. The default size is
12 digits (48 result bits) carried in 60-bit words.

The algorithms are M. D. Ercegovac's radix-16 algorithms for division, multiplication,
logarithm and exponential based on continued products. This RTL is an independent
implementation of them. The comments in the source files call them "the original method".

## The idea: drive one operand to a constant, apply the same factors to the other

Consider division. Suppose we find factors f0, f1, … such that X·f0·f1·… = 1. Then the same
factors applied to Y give Y/X. Choose each factor as (1 + S_k·16^-k), with a small integer
digit S_k in −10…10. Multiplying by a factor then costs only:

- a shift by k hexadecimal places;
- a multiple of 0, 1, 2, 4 or 8 of the shifted word;
- one or two additions.

No multiplier is needed.

Every operation therefore splits into two processes that run side by side, one step per clock:

- **Normalization** (unit AU1) works on X. It holds a *scaled remainder* R_k that measures how
  far the partial product is from its target. From the top bits of R_k it picks the next digit
  S_k, and it updates R_k.
- **Result evaluation** (unit AU2) receives the same digit in the same cycle and builds the
  result.

The four operations differ only in what the two units add each step.

| Operation | AU1 drives… | AU2 forms… |
|---|---|---|
| division | X·∏(1+S_k 16^-k) → 1 | Q = Y·∏(1+S_k 16^-k) |
| logarithm | X·∏(1+S_k 16^-k) → 1 | L = −∑ ln(1+S_k 16^-k), then + Ex·ln 2 |
| multiplication | X − ∑ S_k 16^-k → 0 | P = Y·∑ S_k 16^-k |
| exponential | X − ln M0 − ∑ ln(1+S_k 16^-k) → 0 | E = M0·∏(1+S_k 16^-k) |

Division and logarithm use *multiplicative* normalization. Multiplication uses *additive*
normalization. The exponential runs the logarithm backwards: it subtracts logarithms in AU1 and
multiplies the factors together in AU2.

The constants ln(1 + S·16^-k) come from a small ROM. From step K1 = 7 on, ln(1 + a) equals a to
working precision, so the ROM is replaced by S·16^-k.

The top level holds three engines side by side, each with its own ports:

| Engine | Hardware | Operations | Cycles (M = 12) |
|---|---|---|---|
| two-unit engine | AU1 + AU2 | all four | 13, logarithm 16 |
| serial engine (`cp_serial`) | one unit, used by both processes in turn | all four | 26, logarithm 32 |
| pipelined divider (`cp_pipe_div`) | one adder split into two halves | division | 27 half-length periods |

## The recursions, step by step

k runs from 0 to M = 12. Each line below is one clock cycle of the engine.

- **Division / logarithm, AU1.**
  - First step: R1 = X0 + S0·X0 − 1.
  - Steps 1 ≤ k < KS: R(k+1) = 16·R(k) + S(k) + 16^-(k−1)·S(k)·R(k).
  - From KS = (M+4)/2 = 8 on, the product term no longer affects the digit choice and is
    dropped: R(k+1) = 16·R(k) + S(k).
- **Division, AU2.** Q(k+1) = Q(k) + 16^-k·S(k)·Q(k), with Q0 = Y0.
- **Logarithm, AU2.**
  - Steps k < 7: L(k+1) = L(k) − ln(1 + S(k)·16^-k), with the constant read from the ROM.
  - Steps k ≥ 7: L(k+1) = L(k) − S(k)·16^-k.
  - Three more cycles then add Ex·ln 2 (see below).
- **Multiplication.**
  - AU1: R1 = X0 − 1, then R(k+1) = 16·R(k) − S(k).
  - AU2: P(k+1) = P(k) + Y0·S(k)·16^-k, with Y0 held in a multiplicand register.
- **Exponential.**
  - AU1: R1 = X0 − ln M0, then R(k+1) = 16·R(k) − 16^k·ln(1 + S(k)·16^-k).
  - AU2: E(k+1) = E(k) + 16^-k·S(k)·E(k), starting from E = M0.

*Ex·ln 2.* For the logarithm, the exponent's share is added after the main steps. At the last
main step AU1 is reloaded with Ex/256. Three additive-normalization steps then split it into
three digits S_j. In the same cycles AU2 adds S_j·16^(2−j)·ln 2, taking ln 2 from the ROM.

## Choosing the digits (the selection network)

This is the most delicate part of the design, in `sel_unit.sv`.

Because R_k is kept scaled by 16^k, its size stays bounded, and the next digit follows from its
leading bits alone. The network reads seven bits:

- the sign r0;
- six fraction bits r1…r6.

It then applies *modified rounding*:

    T   = 0.r1r2r3r4r5r6            (bits inverted when R is negative)
    |S| = floor((T + U) · 16)       (4-bit magnitude)

U is a small rounding constant. Its bits are u3…u6, i.e. weights 2^-3…2^-6.

**Multiplicative normalization (division, logarithm).** The digit has the opposite sign of R,
which pushes R back towards zero. U depends on the step:

| Step | Rounding bits |
|---|---|
| step 1 | u3 = r0·r2', u4 = r0·r4'·(r2' + r3'), u5 = r0 + r3'·r4', u6 = r3'·r4 |
| step 2 | u5 = r0 + r1'·(r2' + r3') + r6, u6 = r0·(r1' + r2'·(r3' + r4')) |
| step ≥ 3 | U = 1/32 |

The first two steps are special for a reason. The term 16^-(k−1)·S·R is still large there, so
one fixed rounding constant would not keep R inside the interval that the next step can handle.
The step-1 and step-2 terms encode the allowed digit interval for every 7-bit remainder. They
are small enough to implement as a handful of gates.

The step-2 u6 term was checked against that interval table. With it, no remainder reachable in
step 2 selects a digit outside ±10.

**Additive normalization (multiplication, Ex steps).** Five bits of T are used, U = 1/32, and
the digit has the same sign as R.

**Exponential.** Same rule as additive normalization, but the digit sets of the first two steps
are limited: S1 ≥ −2 and S2 ≥ −9. These limits are what keep the exponential remainder within
range.

**Start rules.** Digit S0 is chosen from X0 while the operands are loaded:

| Operation | Rule for S0 |
|---|---|
| division, logarithm | S0 = 1 if X0 < 5/8, else 0 |
| multiplication | S0 = +1 or −1, with the sign of X0 |
| exponential | S0 is the index of the start factor M0 (table below) |

| X0 | M0 | ln M0 |
|---|---|---|
| X0 ≥ −1/8 | 1 | 0 |
| −3/8 ≤ X0 < −1/8 | e^−1/4 | −1/4 |
| X0 < −3/8 | e^−17/32 | −17/32 |

**Where the selection reads its input.** It reads AU1's adder output, not its register. The new
digit is therefore stored in the five-bit digit register S (sign and magnitude) in the same
clock edge that stores the new remainder.

The engine uses two selection instances:

- one on the operand input, for the start step;
- one on the adder output, for every later step.

Keeping them separate avoids a combinational loop through the ROM.

## One arithmetic unit (`cp_au`, `cp_au_dp`)

Both AU1 and AU2 are the same module. `cp_au` is the register; the combinational part (shifting
network, two select-complement networks, two adders) is `cp_au_dp`, so that the serial engine
can share one datapath between two registers. Each step computes:

    next = main + S · shift(src, n) + c·2^FW

The terms:

- `main` is the register itself, or 16× the register (a 4-bit wiring shift).
- `src` is the register, or an auxiliary word: the multiplicand register or a ROM constant.
- `shift` is the **shifting network**, a two-level barrel switch over a signed digit count:
  - a positive count shifts right; a negative count shifts left;
  - level 1 moves by multiples of 16 bits, in either direction;
  - level 2 moves 0, 4, 8 or 12 bits to the right.
- S·(…) is formed by two **select-complement networks** feeding two cascaded adders:
  - level 1 supplies 0, ±1 or ±2 times the shifted word;
  - level 2 supplies 0, ±4 or ±8 times it.
- Negation is bit inversion plus a carry-in into the same adder.
- `c` is a small integer added at the units position. It carries the "+S(k)" of the remainder
  recursion and the "−1" of the first step.

The control passes all of this as one struct, `au_ctl_t` (in `cp_pkg.sv`).

How each digit is split over the two levels:

| \|S\| | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| level 1 | 0 | 1 | 2 | −1 | 0 | 1 | 2 | −1 | 0 | 1 | 2 |
| level 2 | 0 | 0 | 0 | 4 | 4 | 4 | 4 | 8 | 8 | 8 | 8 |

A negative digit complements both levels.

## Number format

Every word is W = IW + FW = 60 bits of two's complement:

- IW = 8 integer bits, including the sign;
- FW = 4M + 4 = 52 fraction bits.

The four bits beyond the 48 result bits are a guard digit. The logarithm needs it to keep its
error within one unit of 16^-12. The eight integer bits hold ln X + Ex·ln 2 for any 8-bit Ex.

Operand ranges:

| Operation | Operands |
|---|---|
| division | X0 in [1/2, 1) or (−1, −1/2]; Y0 of either sign, \|Y0\| < 1 |
| multiplication | X0 in [1/2, 1) or [−1, −1/2]; Y0 of either sign, \|Y0\| < 1 |
| logarithm | X0 in [1/2, 1); Ex is a signed 8-bit integer |
| exponential | any X with \|X\| < 88 |

## Exponential range reduction (`exp_prep`)

The continued product only covers e^X for X in (−ln 2, 0]. A wider argument is first written as
e^X = 2^I · e^X0:

    N  = X · log2 e
    I  = integer part of N (towards zero), plus 1 when X > 0
    X0 = (N − I) · ln 2          ∈ (−ln 2, 0]

The engine evaluates e^X0 and returns I separately, on `res_exp`. So e^X = `result`·2^`res_exp`.

The two constant multiplications are plain combinational fixed-point multipliers in front of
the engine. They use log2 e and ln 2 rounded to 52 fraction bits.

## The constant ROM (`log_rom`)

The ROM holds ln(1 + S·16^-k) for k = 0…6 and S = −10…10, including ln 2 at k = 0, S = 1. It
also holds:

- the word 1.0, which is used from step 7 on;
- M0 and ln M0 of the exponential.

The table is computed at elaboration time from `$ln`/`$exp`. For small arguments it uses a power
series, rounded to 52 fraction bits. It is laid out as a plain K1 × 21 array. A packed table
would need fewer words.

The ROM stores +ln and lets the select-complement network supply the sign. Its read is
combinational.

## The single-adder pipelined divider (`cp_pipe_div`)

Two complete arithmetic units may be too costly. The alternative divider uses **one** adder,
one shifting network and one multiple-formation network for both recursions.

The adder is cut into two halves: AS' (low 30 bits) and AS'' (high 30 bits). A carry register C
joins them. Each clock period the right half starts one recursion while the left half finishes
the other, one period behind:

| Period | AS' (right half) | AS'' (left half) |
|---|---|---|
| 1 | R'(1) | — (idle) |
| 2k+2 | Q'(k+1) | R''(k+1), then digit S(k+1) is selected |
| 2k+3 | R'(k+2) | Q''(k+1) |
| 2M+3 | — (idle) | Q''(M+1) |

The quotient is in register A = {A'', A'} after **2M + 3 = 27 periods**. A period needs only
about half an adder delay, so the total time is somewhat longer than the two-unit engine's
M + 1 full cycles, with roughly half the datapath hardware.

Registers and paths:

- **A and B.** Both are split into halves. Each half is written only when its adder half is
  active; B takes A's previous contents.
- **L.** Keeps the shifting network's left half for AS'' one period later. It also keeps the
  three bits below the cut, which the ×2/×4/×8 multiples move across it.
- **D.** A 4-bit register that saves the top digit of R'(k), which is needed to form 16·R''(k)
  one period later.
- **S_left.** A copy of the digit the right half used one period earlier, for the left half.
- **Path a.** From period 2 on, the left input of the shifter comes from A'' ("path a").

C holds one carry per adder level, two bits in total, because the adder is two cascaded adders.

The divider sits next to the two-unit engine in `cp_top` and has its own `pd_*` ports. Its
quotients match the engine's bit for bit.

## The single-unit serial engine (`cp_serial`)

If speed matters less than hardware, one arithmetic unit can serve both processes in turn.
`cp_serial` does that. It keeps the two registers R (normalization) and A (result), but has
only one `cp_au_dp` datapath. Each step takes two cycles:

| Cycle of step k | Shared datapath computes | Register written |
|---|---|---|
| first | A(k+1) from A(k) with digit S(k) | A |
| second | R(k+1) from R(k) with digit S(k); selection of S(k+1) | R and S |

The result step runs first, so the normalization step may overwrite the digit register
right away. Only the current digit is ever stored. The sequencer is the same `cp_ctrl`, held by
its `adv` input so that it moves on every second cycle. ROM, selection network, range reduction
and the handling of negative operands are the same as in the two-unit engine. Results are
identical bit for bit; the latency doubles to 2(M+1) = 26 cycles (2(M+4) = 32 for the
logarithm).

The serial engine also sits in `cp_top`, with its own `sr_*` ports.

## Top-level interface (`cp_top`) and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `start` | in | 1 | one-cycle start, accepted while `busy` is low |
| `op` | in | 2 | 0 divide, 1 multiply, 2 logarithm, 3 exponential |
| `x_in`, `y_in` | in | 60 | X and Y (see number format) |
| `ex` | in | 8 | exponent Ex of the logarithm argument (signed) |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-cycle pulse: `result` is valid and stays until the next start |
| `result` | out | 60 | quotient, product, logarithm or e^X0 |
| `res_exp` | out | 9 | exponent I of the exponential (0 otherwise) |
| `s_digit`, `k_step` | out | 5, 4 | digit register and step counter, for observation |
| `pd_start`, `pd_x_in`, `pd_y_in` | in | 1, 60, 60 | pipelined divider: start, X0, Y0 |
| `pd_busy`, `pd_done`, `pd_result` | out | 1, 1, 60 | pipelined divider: status and quotient |
| `pd_s_digit`, `pd_period` | out | 5, 5 | pipelined divider: digit register, period counter |
| `sr_start`, `sr_op`, `sr_x_in`, `sr_y_in`, `sr_ex` | in | 1, 2, 60, 60, 8 | serial engine: as `start` ... `ex` |
| `sr_busy`, `sr_done`, `sr_result`, `sr_res_exp` | out | 1, 1, 60, 9 | serial engine: as `busy` ... `res_exp` |
| `sr_s_digit`, `sr_k_step` | out | 5, 4 | serial engine: digit register, step counter |

Latency, counted from the cycle after `start` to `done`:

| Operation | Cycles |
|---|---|
| division, multiplication, exponential | M + 1 = 13 |
| logarithm | M + 4 = 16 |
| pipelined divider | 2M + 3 = 27 |
| serial engine | 2(M + 1) = 26, logarithm 2(M + 4) = 32 |

Each engine cycle is one full step: shift, two adder levels, selection.

Parameters:

- M (digits, default 12).
- IW (integer bits, default 8).
- FW (fraction bits, default 4M + 4).

KS and K1 follow from M. The ROM's constant generation limits W to 64 bits, so M ≤ 13 with the
default IW.

## Files

| File | Contents |
|---|---|
| `rtl/cp_pkg.sv` | types: digit, select-complement controls, unit control struct, operation codes |
| `rtl/cp_top.sv` | top: controller, two units, selection, ROM, range reduction, pipelined divider, serial engine |
| `rtl/cp_ctrl.sv` | sequencer: step counter, per-step operand routing, Ex·ln 2 phase |
| `rtl/cp_au.sv` | one arithmetic unit: register around `cp_au_dp` |
| `rtl/cp_au_dp.sv` | datapath of a unit: shifting network, select-complement networks, adders |
| `rtl/cp_serial.sv` | single-unit serial engine |
| `rtl/shift_net.sv` | two-level barrel switch |
| `rtl/sel_cmpl.sv` | select-complement network of one adder level |
| `rtl/sel_unit.sv` | digit selection network and start rules |
| `rtl/log_rom.sv` | constant ROM |
| `rtl/exp_prep.sv` | range reduction of the exponential argument |
| `rtl/cp_pipe_div.sv` | single-adder pipelined divider |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification and how to run it

Every testbench checks against values it computes itself, in double precision or in integer
arithmetic. Each has a watchdog and ends with a line `TB_RESULT checks=N failures=M`.

`cp_top_tb` runs the whole design at its default parameters:

- the four worked examples of the method, with their digit sequences compared step by step;
- corner operands at the selection boundaries;
- 400 random operand sets per operation;
- 200 exponentials over |X| ≤ 80;
- 100 divisions by negative divisors;
- 100 multiplications by negative multipliers;
- 100 divisions on the pipelined divider, cross-checked against the engine;
- 400 operations on the serial engine (100 per operation), which must equal the two-unit
  engine's results bit for bit and take 2(M+1) or 2(M+4) cycles.

It also checks every operation's cycle count. It counts how often each mechanism occurs:

- both division start rules;
- simplified recursion steps;
- ROM-bypass steps;
- Ex·ln 2 steps;
- all three exponential start factors;
- the restricted first exponential digit;
- digits of magnitude 10;
- non-zero exponents I;
- pipelined divisions;
- negative divisors;
- S0 = −1 for negative multipliers;
- serial-engine operations.

It fails if any of them never happens.

`cp_serial_tb` runs the serial engine on its own. It uses the same worked examples, with digit
sequences, plus corner and random operands of all four operations, including negative
operands and wide-range exponentials. It also checks the two-cycle step timing.

Accuracy limits used by the testbenches:

| Results | Limit |
|---|---|
| quotients, products, e^X0 | within 2^-46 (four units of 16^-12) |
| logarithms with Ex | within 2^-44 |
| e^X over the wide range | relative error within 2^-42 |

With Verilator 5, from the repository root:

    verilator --binary --timing -Wno-fatal rtl/cp_pkg.sv $(ls rtl/*.sv | grep -v cp_pkg) \
        tb/cp_top_tb.sv --top-module cp_top_tb
    ./obj_dir/Vcp_top_tb

Replace `cp_top_tb` by any other testbench name to run a unit test. Every testbench finishes in
well under a second of simulation time.

## Where this design departs from, or adds to, the method as described

- **Control.** The method does not define a controller. The state machine, the
  start/busy/done handshake and the reset are this design's.
- **Negative divisors.** A divisor in (−1, −1/2] is negated as it is loaded. The first-step
  remainder is then exactly the one the method prescribes for this case. The dividend is
  negated too, so the quotient comes out with its correct sign. All three engines do this.
- **Word width.** Both units use the same 60-bit word. Strictly, only the result unit of the
  logarithm needs the 4-bit guard digit.
- **Ex·ln 2 steps.** These are done by reloading AU1 with Ex/256 at the last main step, with a
  forced zero first digit, for three extra cycles.
- **Step-2 rounding term u6.** It follows the derivation of the step-2 interval table. Two
  step-1 entries lie in regions where two digits are allowed; the rounding equations, not a
  hand-picked value, decide them.
- **Exponential digit limits.** The limits S1 ≥ −2 and S2 ≥ −9 are applied explicitly. Plain
  rounding of a remainder near the lower end of its range would pick S1 = −3, and the
  remainder would then leave its bound.
- **Range reduction.** It uses two dedicated multipliers. How these two multiplications are
  done is left open by the method; running them on the engine itself would also be possible.
- **ROM layout.** The ROM is a full 7 × 21 table, 147 words plus 5, rather than a packed one.
- **Pipelined divider.** The details not fixed by the scheme are own choices:
  - the two-bit carry register C;
  - the wider latch L;
  - the left-half digit copy S_left;
  - idling the right half in the last period.
- **Serial engine.** The method only says that the two processes should alternate on one
  unit so that only the current digit must be kept. The order (result step first), the
  two-cycle step and the reuse of the two-unit sequencer are this design's.
- **Not built:**
  - the exponent arithmetic of floating-point operands (only Ex·ln 2 for the logarithm and I
    for the exponential are handled);
  - the 64-bit configuration, which would need 16 digits and 68 fraction bits.
- **What the tests compare.** For the multiplication and exponential examples only the digit
  magnitudes are compared with the worked examples. The values are checked in full.
