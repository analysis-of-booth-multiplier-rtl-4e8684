# Short-word-length FIR filter with Booth multipliers

A multiplier is the costliest part of a direct-form FIR filter, and its cost
grows quickly with the word length of its operands. This design shrinks the
words instead of the multiplier: both the input samples and the filter
weights are first passed through a sigma-delta modulator (SDM) that turns
each multi-bit value into a single ternary digit, -1, 0 or +1, carried in two
bits. The 8-tap filter then only has to multiply 2-bit numbers, which it
does with small sequential Booth multipliers, one per tap, followed by one
adder. The same filter with 6-, 8- or 10-bit words is the conventional
design it is compared against, and the RTL covers that case by a parameter.

```
 x_in (8 bit) --> [ternary SDM] --2b--> [tap delay line x[n] .. x[n-7]] --+
                                                                          |
 w_in (8 bit) --> [ternary SDM] --2b--> [coefficient line f[0] .. f[7]] --+
                                                                          v
                                     8 x [Booth multiplier 2b x 2b -> 4b]
                                                                          |
                                             [product adder, 8 x 4b -> 7b] --> y_out
```

The output is the convolution of the ternary data stream with the ternary
weight sequence, `y[n] = sum_{k=0}^{7} f[k] * x[n-k]`, an integer in [-8, 8]
for ternary operands (the 7-bit output also holds the full 2-bit range, -2
included).

## The Booth multiplier (`booth_multiplier`)

This is the radix-2 Booth algorithm in its textbook register form, one step
per clock:

| register | width | loaded at start with |
|---|---|---|
| A | N+1 | 0 (left half of the product, plus a guard bit) |
| Q | N | the multiplier (becomes the right half of the product) |
| Q-1 | 1 | 0 |
| M | N+1 | the multiplicand, sign-extended |
| Count | clog2(N+1) | N |

Each step looks at the pair {Q0, Q-1}:

| Q0 Q-1 | action on A |
|---|---|
| 0 0 | none |
| 1 1 | none |
| 1 0 | A <- A - M (a run of ones starts) |
| 0 1 | A <- A + M (a run of ones ends) |

and then shifts {A, Q, Q-1} right by one place arithmetically and decrements
Count. When Count reaches 0 the product is {A[N-1:0], Q}.

Two points need care:

* **Which code subtracts.** 10 must subtract and 01 must add. Swapping them
  gives -M x Q. Some descriptions of the algorithm list it the other way
  round; this RTL follows the rule that actually yields M x Q, and the
  testbench checks all 16 signed 2-bit products.
* **The guard bit.** With A only N bits wide, A - M overflows when M is the
  most negative number (e.g. M = -2, Q = 1 with N = 2). A is therefore N+1 bits
  wide. After the last step the guard bit always equals A's sign bit, and an
  assertion checks this.

Timing: `start` is taken when `busy` is low; `busy` stays high for exactly N
clocks; `done` pulses for one clock after the last step; `product` then holds
until the next start. In the filter the coefficient is the multiplicand and
the data sample the multiplier.

## The ternary sigma-delta modulator (`ternary_sdm`)

A first-order loop with a three-level quantizer. With full scale
FS = 2^(IN_W-1) (128 for 8-bit inputs) and integrator `s`:

```
v    = s + x
y    = +1 if v > FS/2,  -1 if v < -FS/2,  0 otherwise
s   <= v - y*FS
```

`s` never leaves [-FS/2, FS/2] for any input in [-FS, FS-1], so the loop
cannot run away; an assertion watches the bound. Over a block of samples the
digit sum times FS tracks the input sum to within FS. The digit is
registered: `out_valid`/`y` follow `in_valid` by one clock. `clear` empties
the integrator so a sequence (a weight set) starts from a known state.

One digit is produced per input sample, i.e. the modulator runs at the
filter's sample rate; the input is not oversampled. A higher-order loop or an
oversampling front end would be a drop-in replacement with the same ports.

## The filter (`booth_fir`) and its schedule

`booth_fir` is parameterised by `TAPS` (8) and word width `W` (2). It holds
L = TAPS samples in `tap_delay_line` (x[n] itself is registered too), starts
all TAPS Booth multipliers together, and sums their products in
`product_adder`, a plain multi-operand adder sized 2W + clog2(TAPS) bits so
that it cannot overflow.

| clock edge (sample taken at edge 0) | what happens |
|---|---|
| 0 | `in_valid && in_ready`: the delay line shifts in the sample |
| 1 | all multipliers load (coefficients are sampled here) |
| 2 .. W+1 | W Booth steps |
| W+2 | sum registered into `y_out`, `y_valid` pulses, `in_ready` rises |

So a sample costs W+3 clocks: 5 for the ternary filter, 9/11/13 for the 6-,
8- and 10-bit filters. Only one sample is in flight; `in_ready` is low while
it is.

## The top (`sdm_booth_fir_top`)

Ports: `x_valid`/`x_ready`/`x_in` (8-bit signed samples), `w_clear`,
`w_valid`/`w_in` (8-bit signed weights), `y_valid`/`y_out` (7-bit signed).

* **Samples.** A sample is taken when `x_valid && x_ready`. The data
  modulator's digit enters the filter one clock later, so `y_valid` pulses
  5 clocks after the sample edge and `x_ready` returns at the same time: one
  sample per 6 clocks.
* **Weights.** Pulse `w_clear`, then present f[0], f[1], ... f[7] with
  `w_valid`, back to back or with gaps. Each ternary weight enters the
  coefficient line one clock after its `w_in` edge; after eight weights tap k
  uses the modulated f[k]. The line is a second `tap_delay_line`, read in
  reverse order. Weights may be reloaded while samples flow; a filter pass
  already started keeps the coefficients it sampled at its start, and passes
  that start mid-load see a mix of old and new weights. After reset all
  coefficients are 0, so outputs are 0 until a weight set is loaded.

## What follows the published design and what is this design's own

Taken from the published design: the FIR structure (delay chain, one product
per tap, one adder), 8 taps, 2-bit words for the ternary SDM digits and 6-,
8- and 10-bit words for the conventional comparison, SDM conversion of both
data and weights, and the Booth register set, step rule and N-step count.

Chosen here, because the published design does not specify them:

* first-order SDM with thresholds at +-FS/2, 8-bit input width, one digit
  per sample, a `clear` input;
* serial weight loading through a second modulator into a shift register;
* one Booth multiplier per tap running in parallel (a single shared,
  time-multiplexed multiplier is an equally valid reading of the block
  diagram; it would cost TAPS times the latency);
* the guard bit in A; coefficient as multiplicand, data as multiplier;
* valid/ready handshakes, the one-sample-in-flight schedule, full-width
  (unrounded, unsaturated) output;
* asynchronous active-low reset of every register.

The published evaluation reports FPGA resource counts and maximum clock
frequencies for Altera Cyclone, Cyclone II and Stratix III parts. Those are
properties of a vendor tool flow and are not reproduced or checked here.

## Files

| file | content |
|---|---|
| `rtl/fir_pkg.sv` | shared sizes (8 taps, 2-bit word, 8-bit SDM input), ternary type and constants, Booth action enum |
| `rtl/booth_multiplier.sv` | sequential radix-2 Booth multiplier |
| `rtl/ternary_sdm.sv` | first-order ternary sigma-delta modulator |
| `rtl/tap_delay_line.sv` | Z^-1 chain / coefficient store |
| `rtl/product_adder.sv` | multi-operand adder |
| `rtl/booth_fir.sv` | FIR filter core |
| `rtl/sdm_booth_fir_top.sv` | modulators + coefficient line + filter |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fir_multibit` |
| `tb/fir_check_harness.sv` | shared stimulus/checker for the filter core |
| `tb/booth_rand_checker.sv` | shared corner-case/random checker for one multiplier width |

## Verification

Every testbench computes its expected values with its own integer model and
ends with a line `TB_RESULT checks=N failures=M`.

* `tb_booth_multiplier`: all 16 signed 2-bit products; for 6-, 8- and
  10-bit operands the corner cases (most negative x most negative and the
  like) and hundreds of random pairs (shared checker `booth_rand_checker`);
  latency exactly N clocks; start ignored while busy.
* `tb_ternary_sdm`: every digit against a model of the loop, valid timing,
  and for five constant inputs (0, FS/2, -FS/4, FS-1, -FS) the digit mean.
* `tb_tap_delay_line`, `tb_product_adder`: against a queue model and an
  integer sum, including extreme operands.
* `tb_booth_fir`: 400 samples with random 2-bit data and weights,
  coefficients changed between samples, samples offered early (held by
  `in_ready`) and back to back; checks every output, the W+2 latency and the
  W+3 rate.
* `tb_fir_multibit`: the same checks for the 6-, 8- and 10-bit filters.
* `tb_sdm_booth_fir_top`: end to end at the default size: a weight load,
  400 random samples, a second weight load while samples flow; every output
  against models of both modulators, the coefficient line and the
  convolution; 5-clock latency and 6-clock rate; it also counts that each
  mechanism (weight load, reload during filtering, sample held by `x_ready`,
  back-to-back samples, all three ternary digits) occurred.

Each testbench has been seen to fail against a deliberately broken copy of
its module (for example, add and subtract swapped in the Booth step, or the
coefficient line read in the wrong order).

## Simulating

With Verilator 5, from the repository root, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb \
    rtl/fir_pkg.sv tb/tb_sdm_booth_fir_top.sv --top-module tb_sdm_booth_fir_top
./obj_dir/Vtb_sdm_booth_fir_top
```

Replace the testbench name for the others. Every register is reset, so the
results do not depend on the simulator's initial values. To try another
size, change `FIR_TAPS`, `SWL_W` or `SDM_IN_W` in `fir_pkg.sv`, or override
`TAPS`/`W`/`IN_W` on the modules; the output width follows automatically.
