# Low-transition LFSR test pattern generator

In built-in self-test (BIST), an LFSR drives the inputs of the circuit under test (CUT) with
pseudo-random vectors. Successive LFSR vectors are barely correlated, so about half of the CUT's
inputs toggle on every clock. That switching activity, and the power it costs, is well above what
the circuit sees in normal operation.

This generator keeps the LFSR's vectors and their order, but spreads each step over four clocks.
Between two successive LFSR vectors `T^i` and `T^(i+1)` it emits three intermediate vectors. Every
input bit that changes between `T^i` and `T^(i+1)` changes exactly once over the five vectors. So
the transitions per step are unchanged, the transitions per clock drop to a quarter, and at most
one half of the inputs moves in any clock. The intermediate vectors are test vectors in their own
right, and the CUT is clocked with all of them.

## The four-vector round

The outputs are split into an upper half (bits `N-1 .. N/2`) and a lower half (bits
`N/2-1 .. 0`). With `I(a,b)` = "bits equal in `a` and `b` keep their value, bits that differ take
`~s`", one round is:

| cycle (phase) | upper half      | lower half          | sel1 sel2 | load at end of cycle          |
|---------------|-----------------|---------------------|-----------|-------------------------------|
| `PH_T`        | `T^i`           | `T^i`               | 1 1       | LFSR core steps to `T^(i+1)`  |
| `PH_T1`       | `T^i`           | `I(T^i, T^(i+1))`   | 1 0       | lower half takes `T^(i+1)` (en2) |
| `PH_T2`       | `T^i`           | `T^(i+1)`           | 1 1       | —                             |
| `PH_T3`       | `I(T^i, T^(i+1))` | `T^(i+1)`         | 0 1       | upper half takes `T^(i+1)` (en1) |

Then the next round starts with `T^(i+1)` on both halves. Here is the default 8-bit generator's
first round from seed `1010_1011`, with `s = 0`:

```
PH_T   1010 1011
PH_T1  1010 1111   lower: 1011 vs 0101 differ in 3 bits -> those bits take 1
PH_T2  1010 0101
PH_T3  1111 0101   upper: 1010 vs 0101 differ in all bits -> 1111
PH_T   0101 0101   = next LFSR vector
```

The injected value `~s` is 1 when `s = 0` (the OR of the two vectors) and 0 when `s = 1` (their
AND). `s` starts at 0 and toggles after every round. Any value would keep the one-transition
property. The worked example above fixes only the `s = 0` case. Using the AND in alternate rounds
is this design's own choice: it keeps the intermediate bits from always leaning towards 1.

## Blocks

```
            test_en ──► lt_controller ──ctrl (load, adv, en1, en2, sel1, sel2, s)──┐
                                                                                    │
  lfsr (core, T^(i+1)) ──upper──► lt_half_stage u_upper ──► pattern[N-1:N/2]        │
                       ──lower──► lt_half_stage u_lower ──► pattern[N/2-1:0]  ◄─────┘
```

* **`lfsr`**: the conventional LFSR, with external XOR feedback. It shifts toward bit 0 and the
  feedback enters bit `N-1`. Stage `k` of the polynomial is bit `N-k`, so the coefficient of `x^k`
  (bit `k-1` of `POLY`) taps bit `N-k`. The default polynomial is `x^8 + x + 1`, so the feedback is
  `q[7] ^ q[0]`. With this direction, `1010_1011` is followed by `0101_0101`, as in the example.
  With `ZERO_STATE = 1`, a NOR of bits `N-1..1` is XORed into the feedback. This splices the
  all-zeros vector in: `0000_0001 → 0000_0000 → 1000_0000`. The NOR leaves out bit 0, the bit being
  shifted out. A NOR over every bit would only let the register leave the zero state, never reach
  it.
* **`lt_half_stage`**: the two extra logic levels for one half. Level 1 is a register that keeps
  the present half-vector or, on `en`, takes the next one from the core. Level 2 is a multiplexer:
  `sel = 1` shows the held bits and `sel = 0` shows `I(held, core)`.
* **`lt_controller`**: a 2-bit phase counter, plus the `s` flip-flop. It drives the control word
  from the table above.
* **`lp_lfsr`**: the top level, which wires the blocks together. `lt_lfsr_pkg` holds the phase
  enum `lt_phase_e` and the control-word struct `lt_ctrl_t`.

Why the core runs one step ahead: during `PH_T3` the outputs need the upper half of `T^i`, the
lower half of `T^(i+1)` and the upper half of `T^(i+1)`. A single N-bit register cannot hold all
three. So the core steps at the end of `PH_T`, and each half keeps its displayed value in its own
register until its load. This costs `N` extra flip-flops: 8 core + 8 held + 3 control = 19 in
total at the default size.

## Interface and timing

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1     | clock |
| `test_en` | in  | 1     | low: synchronous seed load (the design has no other reset); high: one pattern per clock |
| `pattern` | out | N     | test vector for the CUT |
| `phase`   | out | `lt_phase_e` | which vector of the round is on `pattern` (for observation) |
| `ctrl`    | out | `lt_ctrl_t`  | the controller's control word (for observation) |

Besides the clock, the generator needs only the test-enable pin. Hold `test_en` low for at least
one clock. `pattern` then shows `SEED`, and the first clock with `test_en` high is `PH_T` of the
first round. A new LFSR vector appears every fourth clock. Dropping `test_en` at any time restarts
from the seed with `s = 0`. `pattern` is combinational from flip-flops through one AND/OR gate and
one multiplexer. The `en` and `adv` bits in `ctrl` act at the edge that ends the cycle in which
they are high. A table that lists each enable in the row of the vector it produced therefore shows
it one row later.

Parameters of `lp_lfsr`:

| parameter    | default        | meaning |
|--------------|----------------|---------|
| `N`          | 8              | number of outputs. Set it to the CUT's input count. Upper half gets `N - N/2` bits |
| `POLY`       | `8'b1000_0001` | characteristic polynomial; bit `k-1` = coefficient of `x^k` (here `x^8 + x + 1`) |
| `SEED`       | `8'b1010_1011` | vector loaded while `test_en` is low |
| `ZERO_STATE` | 1              | splice the all-zeros vector into the sequence |

## Limits and departures

* `x^8 + x + 1` is **not primitive**: it factors as `(x^2+x+1)(x^6+x^5+x^3+x^2+1)`. From the
  default seed, the sequence repeats after 64 LFSR vectors (256 clocks), all-zeros included, not
  255. The design specifies this polynomial, so it is kept as the default. For a long test, set
  `POLY` to a primitive polynomial, for example `16'b1011_0100_0000_0000` (`x^16+x^14+x^13+x^11+1`)
  with `N = 16`.
* The splice of the all-zeros vector only gives the full `2^N` sequence when `POLY` is primitive.
* The following are this design's own choices. The design description gives only the function and
  the worked example.
  * The injection rule for `s = 1`.
  * The toggling of `s`.
  * The separate held registers.
  * Using `test_en` low as the seed load.
  * Which bits form each half.
* The power reduction on a real CUT is not reproduced here. It needs the CUT and a gate-level power
  flow. The testbenches measure what drives that reduction, the transitions on the CUT inputs: at
  the default size, 995 over 1200 clocks, against 3980 for a conventional LFSR clocked every cycle.
  The peak per clock is 2 bits, against 8.

## Simulating

Each testbench checks itself and ends by printing `TB_RESULT checks=<n> failures=<n>`.

```
verilator --binary --timing --assert -Irtl -Itb rtl/lt_lfsr_pkg.sv tb/tb_lp_lfsr.sv --top-module tb_lp_lfsr
./obj_dir/Vtb_lp_lfsr
```

| testbench          | what it checks |
|--------------------|----------------|
| `tb_lp_lfsr`       | Full design at default parameters: the example round bit for bit; 300 rounds against a reference model; the transitions of each round equal one conventional step; one half moves per clock; a new vector every 4 clocks; sequence period; restart; every mechanism (both injections, both `s` values, all-zeros vector, restart) seen |
| `tb_lp_lfsr_wide`  | `N = 16` and `N = 9` (uneven halves) with primitive polynomials, against a width-generic model |
| `tb_lfsr`          | Core sequence against a stage-by-stage model, hold when `adv` is low, all-zeros splice, lock-up without the NOR, load priority |
| `tb_lt_half_stage` | Hold and load, and the intermediate bits for both `s` values, on random inputs |
| `tb_lt_controller` | Per-phase control word, `s` toggling, one advance every 4 clocks, restart |
