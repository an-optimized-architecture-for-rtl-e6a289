# Dynamically reconfigurable low-pass FIR filter with multiplier-less tap blocks

This is a transposed-form, linear-phase FIR filter for speech-rate signals. It saves area
and power in two ways:

1. **No multipliers.** A tap multiplier is replaced by an *estimation distribution
   multiplier block* (EDMB). One shared *pre-estimator* computes the eight odd multiples
   `x, 3x, 5x, ..., 15x` of each new sample. Every tap builds its product from those words
   using only shifts, 8:1 multiplexers and additions. The product is exact: nothing is
   truncated.
2. **Small coefficients switched off.** A *decision block* compares each coefficient's
   magnitude with a threshold `Cth`. A coefficient below the threshold switches its
   multiplier off, so that tap contributes 0. The effective filter order therefore follows
   the coefficient set and the threshold, and both can change at any sample. A typical
   threshold is the average of the filter's coefficients.

The default instance has 75 taps, 16-bit signed samples and coefficients, and a 32-bit
output. The 25- and 50-tap variants use the same RTL with the `TAPS` parameter changed.

## Datapath

```
 x_in ─► pre_estimator ─► [reg] ══ pe[0..7] = {x,3x,...,15x} ═══╦══════════╦═══ ... ══╗
         (shared, 1 per filter)                                 ║          ║           ║
                                                   C(0),ctrl ─► EDMB 0   EDMB 1  ...  EDMB 74
                                                                 │          │           │
                                                               [reg]      [reg]       [reg]
                                                                 │          │           │
 y ◄──────────────────────────────────────────────────────────── + ◄[reg]── + ◄ ... ◄[reg]┘
```

- All adders are carry select adders (`csla`). That includes the 74 adders of the
  accumulation chain.
- Registers: one after the pre-estimator, one after each EDMB, and one between each pair
  of chain adders.
- `y` is the combinational output of the first chain adder. It is not registered.

**Timing.** Every register advances when the sample strobe `en` is 1. One sample can be
taken per clock. Let `x[m]` be the sample taken at the m-th enabled edge. Just after that
edge:

```
y = sum_{k=0}^{TAPS-1} C(k) * x[m-1-k]        (modulo 2^32)
```

So a sample first shows up at `y` one enabled edge after it was taken. A product is formed
in the cycle after its sample was taken. It uses the coefficient set and threshold present
at the next enabled edge. After a reconfiguration, older products keep the old
coefficients until they leave the chain, exactly as in any transposed FIR.

**Symmetry.** A linear-phase filter has `C(k) = C(TAPS-1-k)`. Only the first
`NUNIQ = ceil(TAPS/2)` coefficients are ports (38 for 75 taps, centre tap included). Tap
`k` uses port `min(k, TAPS-1-k)`. There is one decision block per port, and its `ctrl`
switches both mirrored EDMBs.

## The EDMB: multiplying by alphabets

This is the part that needs the most explanation.

Each coefficient is converted at the ports to sign-magnitude form: a sign bit and a 16-bit
magnitude. The magnitude is cut into four 4-bit *alphabets*, `c[3:0]`, `c[7:4]`, `c[11:8]`
and `c[15:12]`. Each alphabet goes to its own **select unit**:

- Any non-zero 4-bit value `a` equals `odd << k`, with `odd` in {1, 3, ..., 15} and `k` in
  0..3.
- The **shifter** shifts `a` right until its lowest bit is 1 and counts the shifts (`k`).
- The upper three bits of the shifted value equal `(odd-1)/2`. They select `odd*x` from the
  eight pre-estimates through an 8:1 mux.
- The **inverse shifter** shifts the selected word left by `k` again.
- An all-zero alphabet gives 0.

Example: `a = 1100`. The shifter gives `0011` with `k = 2`, the mux selects entry 1 (`3x`),
and the output is `12x`.

The **adder block** weights the four select-unit results by 2^0, 2^4, 2^8 and 2^12. It sums
them in a tree of carry select adders. If the coefficient's sign bit is set, it then negates
the sum (invert, then add 1 through a carry-in).

For a 16-bit signed sample and a magnitude up to 2^16−1, the product always fits in 32
signed bits. All internal arithmetic is modulo 2^32.

**Switching off.** When `ctrl = 1`, the EDMB forces its alphabets and sign to zero. The
select units and adders then see constant operands and stop toggling, and the product is 0. An
assertion in `drs_fir` checks that every switched-off tap registers a zero product.

**Pre-estimator recipes.** The odd multiples are formed with shifts and carry select adders:

| multiple | formed as |
|---|---|
| 3x  | (x<<1) + x |
| 5x  | (x<<2) + x |
| 7x  | (x<<3) − x |
| 9x  | (x<<3) + x |
| 11x | (x<<3) + 3x, i.e. (x<<3) + (x<<1) + x |
| 13x | (x<<3) + 5x, i.e. (x<<3) + (x<<2) + x |
| 15x | (x<<4) − x |

Each pre-estimate is 20 bits wide.

## Carry select adder

`csla` is the area-delay-power efficient form of the carry select adder. It has five parts:

- **HSG:** half-sum generation, `s0 = a^b` and `c0 = a&b`.
- **CG0 and CG1:** two carry generators. They produce the full carry words for carry-in 0
  and carry-in 1.
- **CS:** the carry select stage. It uses the fact that the carry-in-1 word is 1 wherever
  the carry-in-0 word is 1. Selection therefore reduces to `c1 = c1_0 | (cin & c1_1)`.
- **FSG:** full-sum generation, `sum[i] = s0[i] ^ c1[i-1]` and `sum[0] = s0[0] ^ cin`.
- **Carry-out:** the MSB of the selected carry word.

The two carry generators are written as ripple recurrences. The width `N` is a parameter:
32 in the adder block and the chain, 20 in the pre-estimator.

## Decision block and threshold

`ctrl = (|C| < Cth)`. The multiplier is off when the magnitude is strictly below the
threshold, and on when it is equal or above. The threshold is a 16-bit port, chosen per
coefficient set. The usual choice is the average of all coefficients of the filter. The
average is computed outside the design.

Thresholds quoted for 75-tap equiripple designs (4798 and 5045) imply a larger coefficient
scale than the testbenches use, so the numbers are not directly comparable. The
testbenches scale coefficients by 2^16 (centre tap about 7864 for cut-off 0.12), which
gives averages near 870.

## Ports of `drs_fir`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset, clears every register |
| `en` | in | 1 | sample strobe; all registers hold while 0 |
| `x_in` | in | 16 | signed input sample |
| `coef[0:NUNIQ-1]` | in | 16 each | signed coefficients C(0)..C(centre) |
| `cth` | in | 16 | unsigned coefficient threshold |
| `y` | out | 32 | signed filter output, wraps modulo 2^32 |
| `mult_off` | out | NUNIQ | bit i = 1 when C(i) and its mirror are switched off |

Parameters: `TAPS` (default 75) and `NUNIQ` (derived, leave at default). Shared widths and
types are in `drs_pkg`.

## What follows the source design and what is a local choice

These parts follow the published architecture:

- the shared pre-estimator and the register after it;
- one EDMB per tap, with four 4-bit select units, a sign bit and an adder block;
- the shifter / mux / inverse-shifter select unit;
- the comparator rule `C < Cth` switches the multiplier off;
- decision blocks on the first half plus the centre coefficient;
- the transposed form with a register after each EDMB;
- carry select adders throughout;
- 16-bit data and coefficients, a 32-bit output, and 25/50/75 taps.

These are local choices:

- **Magnitude comparison.** The decision block compares the coefficient's *magnitude*.
  Comparing signed values would switch off every negative coefficient, however large.
- **Coefficient format.** Coefficients arrive in two's complement and are converted to
  sign-magnitude for the EDMBs.
- **Switching off.** A switched-off multiplier is implemented by forcing its operands to
  zero (operand isolation). There is no clock gating.
- **Zero alphabet.** An all-zero alphabet produces 0.
- **Output format.** The output wraps at 32 bits, with no rounding or saturation.
- **Last chain register.** A register also sits between the last EDMB's register and the
  adder before it, so the response is that of a true FIR filter.
- **Control signals.** The reset and the `en` strobe are additions.
- **Pre-estimator adders.** 11x and 13x reuse the 3x and 5x sums.

Not in the RTL:

- the computation of the threshold from the coefficients;
- any coefficient memory (coefficients are ports);
- filter design itself (equiripple, least-squares and window methods are offline tools).

The 50-tap filter needs its own instance (`TAPS=50`). An even-length symmetric filter
cannot be embedded in the odd 75-tap frame. A 25-tap set fits in the 75-tap instance when
centred on taps 25..49 with zeros outside, at the cost of 25 samples of extra delay.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against values computed
independently in the testbench and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `csla_tb` | 32-bit sums and carry-out against a 33-bit addition, with corner and random operands |
| `pre_estimator_tb` | all eight multiples for extreme and random samples |
| `select_unit_tb` | every alphabet 0..15 times many samples, including `1100` and `1110` |
| `edmb_adder_tb` | weighting, summing and sign for random partial products |
| `edmb_tb` | exact products for random signed samples and sign-magnitude coefficients (see notes below) |
| `decision_block_tb` | below, equal and above the threshold, plus random pairs |
| `drs_fir_tb` | full default size, 75 taps (phases listed below) |
| `drs_fir_taps_tb` | 25- and 50-tap instances side by side (helper `fir_taps_check`) |

Notes on `edmb_tb`: it includes the cases 106×124 = 13144 and 253×4 = 1012, and it checks
that `ctrl = 1` gives a product of 0.

`drs_fir_tb` streams 2400 samples of a speech-like signal (two tones plus noise, with
full-scale spikes) through the default 75-tap filter. It uses three kinds of coefficient set:

- Hamming- and Bohman-windowed low-pass sets, cut-off 0.12;
- a wider Hamming set;
- a 25-tap set centred in the frame.

All sets are designed in the testbench. The run goes through these phases:

- threshold 0 (every multiplier on);
- threshold equal to the average coefficient;
- changes of set and threshold in mid-stream;
- gaps in `en`, during which the output must hold.

Every output sample is compared with a reference convolution. The reference uses the
coefficient set in force when each product was formed. The testbench also checks
`mult_off`. It counts multipliers switched off and on, negative coefficients in use,
reconfigurations, holds and the 25-tap phase, and fails if any of them never happened. It
prints the mean square error of the pruned output against the unpruned one. With the
threshold at the average and a Hamming set, that error is about −47 dB relative to 32-bit
full scale.

The testbenches use no parameter overrides except `drs_fir_taps_tb`. The full-size run
finishes in under a second of wall-clock time.

To run one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl rtl/drs_pkg.sv rtl/csla.sv rtl/pre_estimator.sv \
  rtl/select_unit.sv rtl/edmb_adder.sv rtl/edmb.sv rtl/decision_block.sv rtl/drs_fir.sv \
  tb/drs_fir_tb.sv --top-module drs_fir_tb -o sim && ./obj_dir/sim
```

For the leaf blocks, list only the files they use: `drs_pkg.sv` first, then the module and
its children, then the testbench. For `drs_fir_taps_tb`, add `tb/fir_taps_check.sv`.

## Size and limitations

At 75 taps, generic synthesis gives about 25k word-level cells and 3.7k flip-flop bits. The
flip-flops are:

- the 8×20-bit pre-estimate register;
- 75 product registers of 32 bits;
- 74 chain registers of 32 bits.

Mirrored taps see identical inputs, so a synthesis tool may merge their EDMBs and product
registers.

Nothing here has been timed against a clock target. The critical path is one EDMB (a
select unit, then three levels of 32-bit ripple-carry-generator adders) or one chain
adder. That path limits the clock frequency. At 8 kHz speech rates this is irrelevant.

The power and area savings that motivate the design come from fewer switching
multipliers. They are not measured by these testbenches. The testbenches only confirm
that switched-off taps contribute 0.
