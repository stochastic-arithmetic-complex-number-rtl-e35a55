# Stochastic complex sum of products

This design computes the complex sum of products

    f = x[0]y[0] + x[1]y[1] + x[2]y[2] + x[3]y[3]

in *stochastic arithmetic*. In stochastic arithmetic a number is not a binary
word. It is the fraction of ones in a long random bit stream. Multiplying two
numbers then costs one gate, and adding them costs one multiplexer. The price
is time: the result is only as precise as the stream is long. A complex number
needs two streams, one for the real part and one for the imaginary part. The
complex operators are doubled versions of the usual real-valued ones.

The hard part of such a circuit is not the arithmetic. It is the supply of
random numbers. Every operator gives the right answer only if its input
streams, and its multiplexer control streams, are statistically independent
of each other. A naive version of this circuit would need 31 independent
random generators. This one uses two 8-bit LFSRs, plus a fixed wiring trick
(a 4-bit rotation) and a carefully chosen seed, which keep the correlation
error small. The whole circuit has 160 flip-flops.

## Number representation

Each part of a complex number is a *bipolar* stream. If the line is 1 with
probability p, the part has the value 2p - 1, in the range -1 to +1.

Binary numbers are 8-bit codes. A stream is made from a code by a comparator
(the SNG, stochastic number generator). Each cycle the comparator outputs 1 when
the 8-bit random number is **greater than** the code. The random number comes
from a maximal LFSR, which visits each of the values 1 to 255 once per period.
So a code c gives p = (255 - c)/255 and

    value(c) = (255 - 2c) / 255        code 0 -> +1,  code 255 -> -1,  127/128 -> ~0

Note that the mapping is *decreasing*: a larger code means a smaller value.
The output decoder returns its result in the same code, so inputs and outputs
agree. Any user interface has to convert with this formula.

## The operators

All of them are combinational and handle one bit per part per cycle
(`sc_pkg::cstream_t` holds the `re` and `im` bits).

* **Complex SNG (`csng`, helper `sng`)**: two comparators, one per part. Both
  take the *same* random number. This makes the real and imaginary streams of a
  number fully correlated. That is harmless here, because no operator ever
  combines Re(z) with Im(z) of the same z.
* **Complex summer (`csum`)**: one 2:1 multiplexer per part. Input 0 is `a` and
  input 1 is `b`. With a select stream of p = 0.5 the output is
  0.5a + 0.5b. The halving is what keeps the result in range. The real
  multiplexer takes the select input named `sel_im` and the imaginary one
  takes `sel_re`. In this circuit both carry the same bit.
* **Complex multiplier (`cmul`)**: z = 0.5ab. The bipolar product of two
  independent streams is their XNOR. There are four partial products, and the
  Im(a)Im(b) product is inverted to negate it. Two multiplexers then form

      Re(z) = 0.5 Re(a)Re(b) - 0.5 Im(a)Im(b)
      Im(z) = 0.5 Re(a)Im(b) + 0.5 Im(a)Re(b)

  The first-named term of each line is on multiplexer input 0.
* **Complex decoder (`caddie`, helper `addie`)**: two ADDIEs (adaptive digital
  elements), one per part, which share one random number. An ADDIE is an 8-bit
  saturating up/down counter. Its count is turned back into a stream `fb`
  by the same comparator as the SNG (`fb = rnd > cnt`). The counter steps down
  when the input is 1 and `fb` is 0, and steps up when the input is 0 and `fb`
  is 1. It settles at the code whose stream matches the input, and it keeps
  following the input with a noise of a few codes.

## The sum-of-products circuit (`sc_sop_top`)

    x[n], y[n] --> 8 complex SNGs --> 4 cmul (level 1) --> 2 csum (level 2) --> csum (level 3) --> z_s --> caddie --> z_re, z_im
                   ^ LFSR1 (x)          ^ LFSR2 bit 0        ^ LFSR2 bit 3          ^ LFSR2 bit 5            ^ LFSR1
                   ^ LFSR1 rotated by 4 (y)

Each of the three levels halves its result, so the output stream carries
**f/8**. That is why 4 products of values up to |1+i|^2 = 2 stay in range.

### How the random sources are shared

| Stream                           | Source                                      |
|----------------------------------|---------------------------------------------|
| all four x SNGs (re and im)      | LFSR1 word                                  |
| all four y SNGs (re and im)      | LFSR1 word rotated by 4 bits (`SHIFT`)      |
| level-1 multiplexers (re and im) | LFSR2 bit 0 (`SEL_BIT1`)                    |
| level-2 multiplexers             | LFSR2 bit 3 (`SEL_BIT2`)                    |
| level-3 multiplexer              | LFSR2 bit 5 (`SEL_BIT3`)                    |
| both ADDIEs                      | LFSR1 word                                  |

Why this works:

* Every multiplication has one operand from x and one from y. x[n] and y[n]
  must be uncorrelated, and the 4-bit rotation of the word gives a random
  number that is well decorrelated from the unrotated one. The x values may be
  correlated among themselves, because they are never combined with each
  other directly.
* Multiplexer selects must be independent of the data they choose between.
  LFSR2 has the same polynomial as LFSR1, so its sequence is the same
  sequence shifted in time. The only freedom is that time shift, set by the
  seed. Both LFSRs start from their seeds at every load.
* The seed of LFSR2 matters a lot. The testbench `tb_seed_sweep` measures the
  RMSE of f (8 times the output, full scale 1, 64 random operand sets, 16384
  cycles, from the mean of the output stream). Each seed is named by its
  distance d from the LFSR1 seed along the LFSR sequence:

  | LFSR2 seed | d   | meaning                                   | RMSE of f |
  |------------|-----|-------------------------------------------|-----------|
  | 10000000   | 0   | same as LFSR1: one random source for all  | 1.32      |
  | 11110000   | 235 | an arbitrary earlier choice               | 0.56      |
  | 01100010   | 127 | equally spaced, half the period away      | 0.48      |
  | 10111110   | 212 | best seed from an exhaustive search (default) | 0.40  |

  The default 10111110 is the result of a search over all 255 seeds, done on
  a software model of the circuit. The curve of RMSE against d is very
  irregular, so the seed cannot be chosen by a rule.

### LFSRs

`lfsr` is an 8-bit Fibonacci LFSR for x^8+x^6+x^5+x^4+1. Each cycle it shifts
towards the MSB, and bit 0 takes q7 ^ q5 ^ q4 ^ q3. Its period is 255. LFSR1
starts at 10000000 and LFSR2 at 10111110. The form and the shift direction
matter: they decide how far apart two seeds are along the sequence. In this
form the default seed lies 212 steps after the LFSR1 seed, which is where the
seed search found its minimum.

Both LFSRs have period 255 and the operands are held constant, so the output
stream is periodic with period 255. Running longer than a few periods
improves the ADDIE's averaging, but not the stream's systematic correlation
error.

## Interface and timing

| Port                         | Dir | Width   | Meaning |
|------------------------------|-----|---------|---------|
| `clk`                        | in  | 1       | clock |
| `rst`                        | in  | 1       | synchronous, active high: clears the operand registers, reseeds both LFSRs, ADDIEs to 128 |
| `load`                       | in  | 1       | one-cycle strobe: captures the operands, reseeds both LFSRs, ADDIEs to 128 |
| `x_re`,`x_im`,`y_re`,`y_im`  | in  | 8 x [4] | operand codes (see the code mapping above) |
| `z_s`                        | out | 2       | output streams `{re, im}`, carrying f/8 |
| `z_re`, `z_im`               | out | 8       | ADDIE outputs, code of f/8, registered |

A computation is: drive the operands and pulse `load` for one cycle. The
streams of the new operands start in the next cycle. After L cycles, read
`z_re`/`z_im` and convert: f ≈ 8 * value(code). As an alternative, count the
ones of `z_s` over L cycles and take f ≈ 8 * (2*ones/L - 1), which is more
accurate (see below). The reference stream length is L = 16384. The ADDIEs
need a few hundred cycles to leave their mid-scale start. Nothing in the
circuit counts cycles, so the caller chooses L.

All parameters of `sc_sop_top` (`N`, `TAPS`, `SEED1`, `SEED2`, `SHIFT`,
`SEL_BIT1..3`, `ADDIE_INIT`) default to the values above. The
number of terms (4) is fixed by the tree. Synthesis gives 160 flip-flops:
128 operand bits, 2 x 8 LFSR bits and 2 x 8 ADDIE bits.

## Accuracy to expect

These are measured in `tb_sc_sop_top` (64 random operand sets, L = 16384,
defaults), as RMSE of f:

* from the mean of the output stream: **0.40**
* from the final ADDIE reading: **0.77** (worst single error 1.36)

The ADDIE value is read at one instant, so it adds the random walk of its
8-bit counter (a few codes, times 8 on the scale of f) to the stream's error.
For the same configuration a result of about 0.31 has been reported with the
ADDIE as decoder. This design does not reach that figure with the ADDIE as
built here (see "Choices and departures"). Averaging the output stream instead
gives 0.40.

## Choices and departures

What follows the design this RTL implements: the operator structures, the
sharing of one random number per complex SNG, the 4-bit rotation for the y
operands, the three select bits 0/3/5 of a second LFSR (one per tree level,
shared by the real and imaginary multiplexers), the ADDIEs driven by LFSR1,
the 8-bit width, the polynomial, both seeds and the 160 flip-flop budget.

This design's own choices:

* **Comparator orientation and code mapping.** The comparator is `rnd > code`,
  which gives the decreasing code-to-value mapping described above.
* **Select streams uninverted.** An inverted select bit would only swap which
  multiplexer input is taken, which has no statistical effect. A variant that
  derives all selects from LFSR1 uses inverted bits. Bit 6 instead of bit 5 for
  level 3 is a possible alternative; `SEL_BIT3` sets it.
* **Multiplier input order**: which partial product sits on multiplexer input 0.
* **LFSR form**: Fibonacci, shifting towards the MSB. A different form gives
  a different sequence, and then 10111110 is no longer the searched seed.
* **ADDIE details**: the counter direction, saturation, and the start value of 128.
  The accuracy gap noted above may come from a different ADDIE design.
* **Operand registers and the `load`/`rst` protocol**: operands are registered,
  and each load restarts the LFSRs so that every computation is reproducible.
  The 160 flip-flop count supports the registers.
* **Seeds are parameters**, not run-time inputs. A seed search means
  re-elaborating the design per seed.

## Files and simulation

`rtl/`: `sc_pkg` (constants and the `cstream_t` type), `lfsr`, `sng`, `csng`,
`cmul`, `csum`, `addie`, `caddie`, `sc_sop_top`.

`tb/` holds self-checking testbenches. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_lfsr`: sequence against the recurrence, period 255, all states once, re-init.
* `tb_csng`: comparator truth, and exact one-counts over one LFSR period.
* `tb_cmul`, `tb_csum`: all 64 input combinations against a bipolar model,
  plus the output means for random independent streams.
* `tb_caddie`: cycle-exact counter model, convergence to 255(1-p), saturation.
* `tb_sc_sop_top`: end to end at default parameters. A cycle-exact
  reference model checks `z_s`, `z_re` and `z_im` every cycle for 67
  computations of 16384 cycles. It also checks the results against the ideal
  floating-point f/8, prints the RMSE, and counts that load, reset, rotation,
  both values of each select bit, ADDIE up/down steps and saturation all occur.
* `tb_seed_sweep`: four LFSR2 seeds side by side (the table above).

Run one with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/sc_pkg.sv tb/tb_sc_sop_top.sv \
              --top-module tb_sc_sop_top --Mdir obj && ./obj/Vtb_sc_sop_top

Each testbench runs in a few seconds.
