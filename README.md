# On-line magnitude comparator for radix-4 signed-digit numbers

This design compares the magnitudes of two numbers, |X| against |Y|. The
digits arrive one per clock cycle, most significant digit first. It rests on
one identity:

    X^2 - Y^2 = (X + Y) * (X - Y)

- If X + Y = 0 or X - Y = 0, then |X| = |Y|.
- If the two have the same sign, then |X| > |Y|.
- If their signs differ, then |X| < |Y|.

So the comparison needs only an addition, a subtraction and two sign tests.
In a redundant signed-digit number system all four can run most significant
digit first ("on-line"), so no carry ever has to travel from the least
significant end. The comparator can therefore start as soon as the leading
digits of X and Y exist, for example while an earlier on-line operator is
still producing them.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It has four
files in `rtl/`:

| file | what it is |
|---|---|
| `olmc_pkg.sv` | package: default number system, sign and result types, sign operators |
| `ol_sd_adder.sv` | on-line signed-digit adder / subtractor, one digit position per cycle |
| `ol_sign_detector.sv` | on-line sign detector (sign of the most significant nonzero digit) |
| `ol_magnitude_comparator.sv` | the comparator (top level): two adders, two sign detectors, control, decision |

## Number representation

The numbers use the radix-r *ordinary signed-digit* system. Every digit
carries its own sign and lies in {-a, ..., -1, 0, 1, ..., a}, where
r/2 < a < r. The default is r = 4, a = 3, so the digit set is {-3..3}. The
system is redundant: one value has many digit strings. For example
(1 -1)_4 = (0 3)_4 = 3. Negating a number means negating each digit.

The value of an n-digit string is the usual sum of X(i) * r^i, where X(n-1)
is the most significant digit.

- **Digits** are 3-bit two's-complement vectors: -3..3 are 101, 110, 111,
  000, 001, 010, 011. The pattern 100 (-4) is not a digit. Assertions in the
  adder reject it.
- **Signs** use the 2-bit type `olmc_pkg::sign_t`: positive is `01`, zero is
  `00`, negative is `11`. This covers the sign of one digit and the sign of a
  whole number.
- **Results** use `olmc_pkg::mag_rel_t`: `MAG_EQ` = 00, `MAG_GT` = 01
  (|X| > |Y|), `MAG_LT` = 10.

## The on-line adder / subtractor (`ol_sd_adder`)

This is the part that makes the rest possible, so it is worth reading first.
One clock cycle handles one digit position i, from the top down:

    P(i)   = X(i) + Y(i)                 (subtractor: Q(i) = X(i) - Y(i))
    C(i)   = +1 if P(i) >= T, -1 if P(i) <= -T, else 0    (transfer digit)
    S'(i)  = P(i) - r*C(i)                                 (interim digit)
    S(i+1) = S'(i+1) + C(i)                                (output digit)

The interim digit S'(i) always satisfies |S'(i)| <= a - 1. Adding a transfer
of at most 1 from below therefore cannot leave the digit set, and the
transfer never travels further than one position. So digit i+1 of the sum is
final as soon as position i has been seen. The adder keeps S'(i) in a small
register (3 bits after synthesis) and emits S(i+1) in the next iteration.

For an n-digit operation this gives:

- The output stream has n + 1 digits, S(n) down to S(0). Its leading digit
  S(n) = C(n-1) comes out in the same cycle as X(n-1), Y(n-1).
- One extra iteration with X = Y = 0 (position i = -1) is needed to release
  S(0).
- The output is combinational from the current input pair and the register.
  Measured in operand positions, the on-line delay is 1: the digit of weight
  r^i appears together with the inputs of weight r^(i-1).

**`first` input.** `first` marks the top position. It forces S'(n) = 0, so
back-to-back operations need no clearing cycle.

**Carry threshold `CARRY_T`.** The recurrence as normally stated uses
T = a, which is the default here. The published worked comparison example
transfers a carry already at P = 2, which is T = 2 for radix 4. Any T with
r - a + 1 <= T <= a keeps every digit in range, and the value of the result
does not depend on T. Only the digit strings differ. `CARRY_T = 2`
reproduces that example digit for digit (see `tb_worked_example`). An
elaboration-time check enforces the allowed range.

**Subtractor.** `SUBTRACT = 1` negates Y(i) before the position sum. This is
exact, because negating every digit of a signed-digit number negates the
number.

## On-line sign detection (`ol_sign_detector`)

The sign of a signed-digit number is the sign of its most significant
nonzero digit. Digits arrive most significant first, so a running sign PA
(initially 0) is enough. It is updated with

    PA <- PA phi E,    where K phi L = sign(K) if K != 0, else sign(L)

Once PA is nonzero it never changes again. After the last digit, PA is the
sign of the number, and it is 0 only if every digit was 0.

- `pa` is the registered running sign.
- `pa_next` is the value that includes the current digit.
- `first` restarts the update from 0.

## The comparator (`ol_magnitude_comparator`)

### Datapath

```
 x_digit,y_digit ──►(flush: 0,0)──┬──► ol_sd_adder (add) ──► S(i+1) ─► sign ─► E ─► ol_sign_detector ─► PE ─┐
                                  └──► ol_sd_adder (sub) ──► D(i+1) ─► sign ─► F ─► ol_sign_detector ─► PF ─┤
                                                                                                            ▼
                                              M = PE*PF; |X|=|Y| if PE=0 or PF=0; |X|>|Y| if M=+1; else |X|<|Y|
```

Iteration i (i = n-1 down to -1) carries out all of the following in one
clock cycle:

- position sum and difference
- both transfer digits
- both interim digits
- the settled digits S(i+1) and D(i+1)
- their signs E(i+1) and F(i+1)
- the PE and PF updates

### Protocol and timing

| port | meaning |
|---|---|
| `in_valid`, `in_ready` | handshake for one digit pair `x_digit`, `y_digit` (3-bit two's complement), most significant first |
| `in_last` | the offered pair is X(0), Y(0) |
| `dig_valid` | an iteration runs this cycle. `sum_digit` = S(i+1), `diff_digit` = D(i+1), `sum_sign` = E(i+1), `diff_sign` = F(i+1), `pe_run` / `pf_run` = PE / PF including this iteration |
| `res_valid` | one-cycle pulse with `res_rel`, final `res_pe` (= sign of X+Y), `res_pf` (= sign of X-Y) and `res_m` = PE*PF |

An example for n = 3, with `in_valid` held high:

```
cycle        0        1        2        3          4
accepted     X2,Y2    X1,Y1    X0,Y0    -          next X,Y may start here
iteration    i=2      i=1      i=0      i=-1       -
in_ready     1        1        1        0          1
outputs      S3,D3    S2,D2    S1,D1    S0,D0      res_valid=1
```

- The flush iteration (i = -1) follows the last pair automatically.
  `in_ready` is low only in that cycle.
- The result appears n + 1 cycles after the first digit is accepted. In
  general it comes two cycles after the last pair is accepted, whatever gaps
  `in_valid` had.
- A new comparison may start in the cycle that shows the result. The
  throughput is therefore one n-digit comparison every n + 1 cycles.
- The operand length is not fixed in hardware. Any n >= 1 works, and the
  digit streams and the decision are correct for every length.

**Reset.** `rst_n` is asynchronous and active low. It clears every register:
the interim digits, PE, PF and the control state.

### What it costs

With the defaults, synthesis gives 13 flip-flop bits:

- 3 bits each for the two interim digit registers
- 2 bits each for PE and PF
- 3 control bits

plus about 80 word-level cells of logic. The combinational path per
iteration is:

- a 4-bit position sum
- a threshold compare
- a 4-bit subtract of r*C
- a 4-bit add of the incoming transfer
- a zero/sign test
- a 2-bit select

This path is independent of n.

## A worked example

X = (1 2 -1 0 1)_4 = 369 and Y = (-1 0 -2 -1 -1)_4 = -293. With
`CARRY_T = 2`, the iterations i = 4 .. -1 give:

| i | 4 | 3 | 2 | 1 | 0 | -1 |
|---|---|---|---|---|---|---|
| S(i+1) | 0 | 1 | -3 | 1 | -1 | 0 |
| D(i+1) | 1 | -1 | -2 | 1 | 2 | -2 |
| PE | 0 | 1 | 1 | 1 | 1 | 1 |
| PF | 1 | 1 | 1 | 1 | 1 | 1 |

- S = 76 = X + Y and D = 662 = X - Y.
- PE = PF = +1, so M = +1 and |X| > |Y|.

With the default `CARRY_T = 3` the digits are different:

- S = (0 0 1 1 -1 0)
- D = (0 2 2 1 1 2)

The decision is the same.

## Changing the number system

The parameters are `RADIX`, `ALPHA`, `DW` (digit width) and `CARRY_T`. They
are passed from the comparator down to both adders. The constraints are
checked at elaboration:

- r/2 < a < r
- r - a + 1 <= CARRY_T <= a
- 2a < 2^DW

For radix 8 with digits {-6..6}, for instance, use `RADIX=8, ALPHA=6, DW=4`.
The comparator has been simulated at radix 4. The adder has also been
simulated on its own at radix 8.

Binary signed digits (digit set {-1, 0, 1}) and other generalized
signed-digit systems are *not* covered. For them r/2 < a fails (r = 2,
a = 1), and the one-position transfer rule above no longer keeps every digit
in range.

## Verification

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_ol_sd_adder` | Four radix-4 adders at once (add/subtract × threshold 3/2), plus a radix-8 add/subtract pair. It checks the worked addition (-3 -1 1 0 -2 3) + (-1 3 3 2 0 -2) = (-1 0 3 0 2 -2 1) = -3303 digit by digit, and the example comparison's sum and difference digits. It then runs 3000 random operations of 1-12 digits with idle cycles, checking stream length n+1, digit range, and value against integer arithmetic, at both radices. |
| `tb_ol_sign_detector` | Random sign streams with long zero runs, idle cycles and back-to-back numbers, against the "first nonzero digit" rule. |
| `tb_ol_magnitude_comparator` | End to end at the default parameters. It runs 4000 comparisons of 1-16 digits, including equal magnitudes written with different digits, X = -Y, and operands that differ in one digit. There are random input gaps and back-to-back starts. It checks the decision, the final PE/PF/M, both digit streams, `in_ready`, and the result latency (n+1 cycles). It counts each mechanism and fails if one never occurs: >, <, equality via PE=0 and via PF=0, recoded operands, gaps, flush stalls, back-to-back starts, carries of either sign into the extra digit, and one-digit operands. |
| `tb_worked_example` | The worked example above, iteration by iteration: every row with `CARRY_T = 2`, and the default instance's rows. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/olmc_pkg.sv tb/tb_ol_magnitude_comparator.sv \
    --top-module tb_ol_magnitude_comparator -Mdir obj
./obj/Vtb_ol_magnitude_comparator +verilator+rand+reset+2
```

Every testbench finishes in well under a second.

The RTL has concurrent assertions:

- digits in range at the adder inputs and outputs
- a settled running sign never changes
- no operand is accepted during the flush iteration

They are active under `--assert`.

## Where this RTL makes its own choices

- **Clocking, handshake, the flush cycle generated inside the unit, the
  one-cycle result pulse, and reset.** The algorithm is stated as an
  iteration and does not specify any of these.
- **Carry threshold.** The default follows the algorithm's stated threshold
  (a). The worked example's threshold (2) is available as a parameter. Both
  give correct results.
- **The product M = PE*PF.** It is formed once, from the final PE and PF, not
  kept as a register per iteration. Only its final value decides anything.
  The running PE and PF are brought out, so the per-iteration M can be formed
  outside (the worked-example testbench does this).
- **Not built.**
  - The fully parallel form of the signed-digit adder, where all positions
    are computed at once. It is the basis of the serial slice here, but the
    comparator does not use it.
  - The conventional comparators (digit-by-digit and log-depth
    divide-and-conquer). They are only background.
- **Delay.** The algorithm's own delay figure counts full-adder delays that
  grow with n (about n + 2 of them for an n-digit on-line addition). In this
  one-position-per-cycle implementation the delay per cycle is constant, and
  an n-digit operation takes n + 1 cycles.
