# Deterministic Halton sequence stochastic computing

Stochastic computing (SC) represents a number in [0, 1] as the fraction of 1s
in a bit-stream, so that one gate does an arithmetic operation: an AND of two
independent streams multiplies, a multiplexer adds with scaling, an XOR of two
fully correlated streams takes an absolute difference. The catch is time. Two
N-bit streams must meet in every combination before a product is exact, which
takes 2^(2N) cycles (65 536 for 8 bits).

This design makes those long runs optional. Each stochastic number generator
(SNG) compares its operand with a **base-2 Halton sequence**. That sequence is
just a binary counter read with its bits reversed: 0, 1/2, 1/4, 3/4, 1/8, ...
Its first 2^k values always cover the interval evenly, so a stream built from
it is already accurate to 1/2^k after 2^k bits. Two such sources are then kept
uncorrelated by one of three **deterministic approaches**: relatively prime
lengths, rotation, or clock division. The full period still gives an exact
result, but a computation can be stopped much earlier with a small, predictable
error. For the two image filters here, 2^(N+1) cycles already give exact
results.

The RTL contains:

* the three SNG pairs;
* a length controller that ends a computation after any chosen number of cycles;
* three circuits built on the SNG pairs: a multiplier, a Robert's cross edge
  detector and a Bernsen binarizer;
* one top level, `dhs_sc_top`, that joins them.

The design follows the brief *Accelerating Stochastic Computing Using
Deterministic Halton Sequences* (Lin, Xie, Xu, Han, Zhang). The section
"What is taken from the source and what is not" lists where this RTL goes
beyond the published description.

## The number source: a bit-reversed counter

`halton_counter` is an N-bit up-counter. Its `halton` output has bit i equal to
count bit N-1-i. That reversal is the base-2 radical inverse, so the output is
the Halton (van der Corput) sequence and costs no logic beyond the counter. A
`LAST` parameter sets the state after which the counter restarts at 0:

* `LAST = 2^N-1` gives a plain wrap-around counter;
* `LAST = 2^N-2` gives a period of 2^N-1.

`sng_comparator` turns an operand into a stream: `bit = b > h`. Over one period
of h the stream holds exactly b ones, so it encodes b/2^N.

## Three ways to keep two Halton streams apart

Every pair module has the same shape (`dhs_sng_prime`, `dhs_sng_rotation`,
`dhs_sng_clkdiv`). Halton1 counts every enabled cycle and feeds bit-stream 0.
Halton2 feeds bit-stream 1. Both Halton values are brought out (`h0`, `h1`) so
that other comparators can share the same sources. The pairs differ only in how
Halton2 moves:

| pair | Halton2 | full period (N = 8) | value of stream 1 |
|---|---|---|---|
| prime length | period 2^N-1: restarts after state 2^N-2 (11111110) | 2^N·(2^N-1) = 65 280 | b/(2^N-1) |
| rotation | holds for the one cycle in which counter1 is all ones | 2^(2N) = 65 536 | b/2^N |
| clock division | steps once per pass of counter1, as counter1 leaves all ones | 2^(2N) = 65 536 | b/2^N |

Within its full period, every state of Halton1 meets every state of Halton2
exactly once. An AND of the two streams therefore counts exactly a·b ones.

The prime-length pair is a special case. Halton2 never reaches state 2^N-1,
whose reversed value is 2^N-1. Its stream thus has b ones in 2^N-1 bits. The
exact product is a·b/65 280, not a·b/65 536.

How the pairs behave when a run is cut short differs:

* **Rotation and prime length.** Both sources advance almost together, and the
  error falls steadily as the run gets longer.
* **Clock division.** Halton2 holds one value for a whole pass of Halton1. A
  run of 2^k passes therefore samples only 2^k values of operand b. It
  converges more slowly for products, but it works very well where the second
  stream is only a 1/2 select (see below).

## Early termination: `run_ctrl`

A computation runs as follows:

1. A `start` pulse while idle asserts `clr` in the same cycle. This restarts
   the number sources and empties every output counter.
2. The controller latches `bsl` and asserts `run` for exactly `bsl` cycles.
3. In the next cycle `done` pulses and all counts are final.

Start to `done` takes **bsl + 1 cycles**. A `start` while busy is ignored.
`bsl` is an arbitrary cycle count, 17 bits wide at N = 8, so:

* 2^16 gives a full period;
* 255·2^k gives the truncation points of the prime pair;
* 2^(N+1) is the length used for the image filters.

## The circuits

**`sc_multiplier`**: an AND gate and a counter (`sc_counter`). After L cycles,
count/L estimates a·b/2^(2N).

**`roberts_cross_sc`** computes Z = ½(|X(i,j)−X(i+1,j+1)| + |X(i+1,j)−X(i,j+1)|):

* The four pixels are compared against the *same* Halton1 value. Their streams
  are therefore fully correlated, and an XOR of two of them is the stream of
  their absolute difference.
* A multiplexer adds the two differences with weight ½. Its select stream is
  Halton2 compared with 2^(N−1), which has value ½.
* The output count after L cycles estimates Z·L.

With the rotation or clock-division pair, a run of 2^(N+1) cycles gives each
multiplexer input one complete pass of Halton1. The count is then exactly
|X(i,j)−X(i+1,j+1)| + |X(i+1,j)−X(i,j+1)|.

**`bernsen_sc`** binarizes the centre pixel of a 3×3 window (K = 3) by
Bernsen's rule, using the window's minimum and maximum:

* local threshold T = (min+max)/2;
* contrast H = max−min;
* if H > S the pixel is 1 when X > T;
* otherwise the neighbourhood is treated as uniform, and the pixel is 1 when
  T > TT.

S and TT are user thresholds. The circuit works as follows:

1. All nine pixel streams come from Halton1, so they are correlated. Their AND
   is the stream of the minimum and their OR the stream of the maximum.
2. A multiplexer with a ½ select takes the AND on input 0 and the OR on
   input 1, giving T. An XOR of AND and OR gives H.
3. Three counters convert the centre-pixel, T and H streams to binary. Over
   BSL = 2^(N+1) cycles they hold 2X, 2T = min+max and 2H, in units of 1/2^N.
   With rotation or clock division these counts are exact.
4. Three comparators form the enables:
   * `EN1 = H count > S·BSL`
   * `EN2 = T count > TT·BSL`
   * `EN3 = X count > T count`
5. `bernsen_logic` computes `OUT = EN1·EN3 + ¬EN1·EN2`.

S·BSL and TT·BSL are formed as (s·len)>>N, so the thresholds scale with
whatever length the run has.

## Top level: `dhs_sc_top`

`dhs_sc_top` holds all three SNG pairs, the controller and the three circuits.
The run-time input `approach` (`dhs_pkg::approach_e`: 0 prime, 1 rotation,
2 clock division) is sampled at start. It selects which pair advances and which
pair's Halton values and streams drive the circuits. All three circuits run in
every computation:

* the multiplier takes `mul_a`/`mul_b` through the selected pair's own
  comparators;
* Robert's cross (`rc_pix[0..3]` = X(i,j), X(i,j+1), X(i+1,j), X(i+1,j+1)) and
  Bernsen (`bn_pix[0..8]` row major, centre at index 4; `bn_tt`, `bn_s`)
  compare their pixels with the shared Halton values.

Outputs:

* `mul_count` and `rc_count`;
* `bn_x_cnt`, `bn_t_cnt`, `bn_h_cnt` and `bn_out`;
* `busy` and `done`.

The counts are live during a run. Reading them at cycle L of a longer run gives
the result truncated to L, which is how the workload testbenches measure error
against length.

Parameters are `N` (precision, default 8) and `LW` (length and count width,
default 2N+1 = 17). Reset is asynchronous and active low. There is one clock.

## What is taken from the source and what is not

Taken from the published design:

* the base-2 Halton source as a counter;
* the comparator SNG with inputs B and H;
* the three pairing rules, including counter2 restarting after 11111110 and
  the inhibit / count-once behaviour on counter1 all ones;
* 8-bit precision;
* the Bernsen datapath: AND/OR of correlated streams, MUX with a ½ select, XOR,
  three counters, comparators against TT·BSL and S·BSL, and the output equation;
* k = 3 and BSL = 2^(N+1) for Bernsen;
* Robert's cross as an equation built from XOR and MUX.

This design's own choices:

* **Clock division uses a count enable instead of a divided clock.** The
  original drawing clocks Halton2 from an AND of counter1's bits. Here Halton2
  shares the clock and is enabled by that AND, which keeps one clock domain.
* **Comparator orientation.** The drawings do not show which input is on the
  greater side. The choices here are B > H, H > S·BSL, T > TT·BSL and X > T,
  which follow Bernsen's rule.
* **Minimum and maximum gates.** The source text says the AND gives the
  maximum and the OR the minimum. For correlated unipolar streams it is the
  other way round, and the RTL uses AND = min, OR = max. T and H are the same
  either way.
* **The ½ select stream** compares Halton2 with 2^(N−1). The source does not
  say how the select stream is made.
* **Controls and interfaces.** `clr`/`en` on the sources, the length
  controller and its timing, counter widths, reset values, threshold scaling
  by the run length, and the combined top with a run-time approach select are
  this design's own. The source evaluates each circuit with each pair
  separately.
* **Image handling.** No image memory or window buffer is described; the top
  takes one window per computation.

Not included: the counter- and LFSR-based SNGs that served only as baselines,
and the conventional binary filters used as references (those live in the
testbenches as models).

## Measured behaviour

These results come from the workload testbenches, which run on the full-size
engine.

Product error (`tb_wl_multiplication`): mean absolute error in % over 48
random operand pairs, against run length. For the prime pair, "2^k" means
255·2^(k−8) cycles.

| pair | 2^16 | 2^15 | 2^14 | 2^13 | 2^12 | 2^11 | 2^10 | 2^9 | 2^8 |
|---|---|---|---|---|---|---|---|---|---|
| prime length | 0 | 0.0004 | 0.0013 | 0.0075 | 0.022 | 0.13 | 0.51 | 1.66 | 7.4 |
| rotation | 0 | 0.0005 | 0.0017 | 0.0072 | 0.033 | 0.11 | 0.49 | 1.78 | 7.1 |
| clock division | 0 | 0.088 | 0.31 | 0.62 | 1.46 | 3.20 | 5.88 | 12.4 | 27.4 |

Edge detection on a generated 128×128 image (`tb_wl_edge_detection`):

* Rotation and clock division are exact for every window from 2^9 cycles on.
* The prime pair is off by 0.0034% (mean) at 2^9.
* All pairs are off by about 0.3% at 2^8.

Bernsen binarization (`tb_wl_bernsen`, 48×48 unevenly lit test image):

* At every width from 4 to 8 bits, rotation and clock division reproduce the
  integer Bernsen rule exactly at BSL = 2^(N+1).
* The share of pixels that differ from the 8-bit binary result falls from 4.4%
  at 4 bits to 0 at 8 bits.

Bit-flip noise on the three counted streams (`tb_wl_fault_tolerance`, rotation
pair, BSL 2^9, 32×32 image), share of pixels wrong:

| noise | 0% | 10% | 20% | 30% | 40% | 50% |
|---|---|---|---|---|---|---|
| pixels wrong | 0% | 1.7% | 13.9% | 13.9% | 20.7% | 49% |

Where to inject the noise is this testbench's choice.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog. `tb/dhs_ref_pkg.sv` is an
independent closed-form model of the number sources:

* counter1(t) = t mod 2^N;
* prime: counter2(t) = t mod (2^N−1);
* rotation: counter2(t) = (t − ⌊t/2^N⌋) mod 2^N;
* clock division: counter2(t) = ⌊t/2^N⌋ mod 2^N.

The testbenches compare the RTL with this model cycle by cycle.

`tb_dhs_sc_top` is the end-to-end test at the default size. For each of the
three pairs it runs:

* a full-period run, with an exact product;
* many 2^(N+1) runs, with exact image filters for rotation and clock division;
* runs of 1, 256 and 1000 cycles.

It also checks the bsl+1 latency and counts that every mechanism occurs:
ignored start while busy, rotation inhibit, clock-division step, prime restart,
and both Bernsen branches.

To build and run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/dhs_pkg.sv tb/dhs_ref_pkg.sv tb/tb_dhs_sc_top.sv --top-module tb_dhs_sc_top
    ./obj_dir/Vtb_dhs_sc_top

Run times:

* the block and end-to-end tests: under a second each;
* `tb_wl_multiplication` and `tb_wl_bernsen`: about 5 s each;
* `tb_wl_fault_tolerance`: about 2 s;
* `tb_wl_edge_detection`: about 25 s.

## Limits and trust

* Every block is checked against independent models. All pairing rules are
  verified over full periods, and exactness is proven by simulation where
  theory predicts it.
* Accuracy figures come from generated test images, not photographs.
* Area, power and delay have not been measured. All logic is small: the whole
  top is about 230 word-level cells and 170 flip-flops at N = 8.
* No timing constraints or physical implementation are included.
