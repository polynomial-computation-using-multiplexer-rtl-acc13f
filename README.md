# Stochastic Horner evaluator for e^x, e^-x, sinh(x) and cosh(x)

This design evaluates four transcendental functions, each approximated by a short
Taylor polynomial, without a single binary multiplier or adder in the datapath. The
input `x` is turned into random bit streams whose probability of a 1 equals `x`.
AND gates multiply these streams, multiplexers add them, and the polynomial is
evaluated in nested (Horner) form by a short chain of AND + multiplexer stages. A
counter then measures the fraction of ones in the output stream and turns it back into
a binary number.

| function | polynomial evaluated                 | produced as | stages used |
|----------|--------------------------------------|-------------|-------------|
| e^x      | 1 + x + x^2/2 + x^3/6                | e^x / 4     | 3           |
| e^-x     | 1 - x + x^2/2 - x^3/6                | e^-x        | 3           |
| sinh(x)  | x + x^3/6                            | sinh / 2    | 4           |
| cosh(x)  | 1 + x^2/2 + x^4/24                   | cosh / 2    | 5           |

`x` is an 8-bit unsigned fraction in [0, 1). The result `y` is unsigned fixed point
with 3 integer and 8 fraction bits. One evaluation takes 1025 clocks at the default
1024-bit stream length.

## Stochastic numbers in one paragraph

A *unipolar stochastic number* is a bit stream whose value is P(bit = 1), so it can
only hold values in [0, 1]. If two streams are statistically independent:

* `a & b` has value a·b (multiplication is one AND gate);
* `s ? a : b` has value s·a + (1−s)·b (a multiplexer is a weighted adder; with s = ½
  it gives (a + b)/2);
* `p ? 0 : a` has value a·(1 − p).

Independence is the one thing that must be paid for. `x & x` is `x`, not x², so every
place where x appears in the polynomial gets its own copy of the x stream, made by its
own random source.

## How a polynomial becomes a chain of stages

Horner's rule nests a polynomial as a0 + x(a1 + x(a2 + x·a3)), so it can be evaluated
innermost-first with one multiply and one add per level. In hardware each level is a
`horner_stage`: an AND gate forms the product `p = x·c·v` (an independent x copy,
a coefficient stream `c` and the stream `v` from the inner stage), and a multiplexer
finishes the step. The stage has four modes:

| mode   | output     | value                  |
|--------|------------|------------------------|
| `PASS` | `v`        | v                      |
| `MUL`  | `p`        | x·c·v                  |
| `ADD`  | `h ? a : p`| (a + x·c·v) / 2        |
| `SUB`  | `p ? 0 : a`| a·(1 − x·c·v)          |

`h` is an independent stream of value ½; each stage can also replace x by 1 (`use_x`).

The hard part is that the Taylor polynomials break the [0, 1] rule: e^-x has negative
coefficients and e^x, sinh and cosh exceed 1. The coefficient table (`coef_rom`)
therefore uses factored forms in which every intermediate stream stays a
probability (stage 0 is innermost and starts from a constant-1 stream):

* **e^-x** = 1 − x(1 − (x/2)(1 − x/3)): three `SUB` stages with c = 1/3, 1/2, 1.
  Expanding gives exactly 1 − x + x²/2 − x³/6.
* **e^x / 4**: s0 = (1 + x/3)/2, s1 = (1 + x·s0)/2, s2 = (½ + x·s1)/2, all `ADD`.
* **sinh / 2**: x/6 → x²/6 → (1 + x²/6)/2 → x·(1 + x²/6)/2 (`MUL`, `MUL`, `ADD`
  without x, `MUL`).
* **cosh / 2**: x/12 → x²/12 → W = (1 + x²/12)/2 → x·W → (1 + x·xW)/2, which
  expands to (1 + x²/2 + x⁴/24)/2.

Coefficients are 9-bit codes (value = code/256); the 9th bit allows exactly 1.0,
an all-ones stream. 1/3, 1/6 and 1/12 are rounded to 85, 43 and 21. The output
counter multiplies the measured probability back by 4, 1, 2 or 2.

The core has five stages, which is what cosh needs in this factoring; shorter
functions leave the outer stages in `PASS`.

## Random sources

Each stream comes from an `sng`: a 16-bit maximal-length Galois LFSR
(x^16 + x^14 + x^13 + x^11 + 1), whose top 8 bits `r` are compared with the
operand: the bit is `r < value`. Over a full LFSR period this gives exactly
value·256 ones (one fewer for a non-zero value, as the all-zero state never occurs).

Every stage has four generators (x, a, c, ½), so the top holds 20 LFSRs, each with
its own seed from `sng_seed()` in the package. They all run the same sequence from
different starting points. This is good enough for the accuracy below. If the x
copies share one seed, x·x collapses to x and results drift far outside it.
All generators are reseeded at every start, so the same `x` and function always give
the same `y`.

## Operation and timing (`sc_poly_top`)

1. Idle: pulse `start` for one clock with `func` (0 e^x, 1 e^-x, 2 sinh, 3 cosh) and
   `x`. Both are latched; `start` while `busy` is ignored.
2. Load: the coefficient table output is registered, all LFSRs are reseeded and the
   counter is cleared.
3. Run: for N = 2^LOG2N clocks the generators advance and the counter adds the output
   bit. `y_stream` is the output stochastic stream and `x_stream` one of the input
   streams (stage 0's copy of x); both are meaningful while `y_stream_valid` is high.
4. Done: `done` pulses for one clock; `y` and `ones` hold until the next start.

`done` is high after the (N+1)-th rising edge that follows the edge that samples
`start`. `busy` stays high up to and including the `done` cycle, so a new `start`
must come after `done` has fallen. Reset (`rst_n`) is active-low and asynchronous.

## Accuracy

`tb_sc_poly_sweep` runs all 256 input codes for every function at N = 1024. The absolute
errors of `y` are:

| function | mean vs polynomial | max vs polynomial | mean vs exact | max vs exact |
|----------|--------------------|-------------------|---------------|--------------|
| e^x      | 0.025              | 0.072             | 0.025         | 0.071        |
| e^-x     | 0.010              | 0.026             | 0.005         | 0.019        |
| sinh(x)  | 0.018              | 0.052             | 0.019         | 0.055        |
| cosh(x)  | 0.015              | 0.029             | 0.014         | 0.029        |

The error in the measured probability is about the same for every function (at most
0.026). The functions produced at a reduced scale (e^x/4, sinh/2, cosh/2) have that
error multiplied by 4 or 2. The testbenches accept an error of up to 0.035 times the
scale. Raise `LOG2N` for more accuracy: the random error falls as 1/sqrt(N), and the
latency grows as N. Error against the exact function also includes the truncation of
the Taylor series. At x = 1, for example, the 4-term e^-x polynomial alone is 0.035
below e^-1.

## Parameters and sizes

| where           | name      | default   | meaning                                        |
|-----------------|-----------|-----------|------------------------------------------------|
| `sc_poly_top`   | `LOG2N`   | 10        | log2 of the stream length / observation window |
| `sc_poly_pkg`   | `W`       | 8         | operand and random-number width                |
| `sc_poly_pkg`   | `LFSR_W`  | 16        | LFSR width                                     |
| `sc_poly_pkg`   | `NSTAGES` | 5         | Horner stages in the core                      |

None of these values is fixed by the source architecture; all are this design's
choices. Changing `W` or `NSTAGES` also requires editing the coefficient table.

## What this design adds to, and leaves out of, the architecture it implements

The architecture specifies the flow (fixed-point input → function selection →
coefficient loading → LFSR + comparator conversion → Horner core of AND gates and
multiplexers → output stream → counter), the unipolar encoding, the four functions and
their Taylor polynomials. The following are this design's own choices:

* the stage-level factoring of each polynomial that keeps every stream in [0, 1];
  this includes the `SUB` stage for negative terms and the power-of-two output scaling.
  The published e^-x circuit sketch uses constants 1/6 and 1/2. This design uses 1/3,
  1/2 and 1, nested to the same polynomial;
* one shared, configurable five-stage core rather than a separate circuit per
  function;
* all widths, the LFSR polynomial, the seeds, the stream length, the result format,
  the start/busy/done handshake and the reset style.

Not included: the conventional binary multiplier/adder implementation and the
non-Horner (direct-form) gate circuit, which serve only as points of comparison. The
power, area and timing numbers reported for the architecture came from synthesis in an
unspecified cell library, and nothing here reproduces them.

## Files

| file                   | content                                                   |
|------------------------|-----------------------------------------------------------|
| `rtl/sc_poly_pkg.sv`   | widths, coefficient codes, function/mode enums, stage struct, seed function |
| `rtl/lfsr.sv`          | Galois LFSR                                               |
| `rtl/sng.sv`           | LFSR + comparator stochastic number generator             |
| `rtl/coef_rom.sv`      | function → stage configuration and output scale           |
| `rtl/horner_stage.sv`  | one AND + multiplexer stage                               |
| `rtl/horner_core.sv`   | the five-stage cascade                                    |
| `rtl/prob_counter.sv`  | ones counter and binary conversion                        |
| `rtl/sc_poly_top.sv`   | controller, 20 generators, core and counter               |
| `tb/tb_*.sv`           | one self-checking testbench per module                    |
| `tb/tb_sc_poly_sweep.sv` | accuracy sweep: all 256 inputs for all four functions   |

Each testbench prints `TB_RESULT checks=N failures=M`. `tb_sc_poly_top` runs all four
functions over an x sweep at the default parameters. It also checks the latency, that a
`start` while busy is ignored, repeatability, and that every stage mode was used.

## Simulating

```
verilator --binary --timing --assert -y rtl rtl/sc_poly_pkg.sv \
    tb/tb_sc_poly_top.sv --top-module tb_sc_poly_top -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run any other testbench. All of
them finish in a few seconds.
