# Lean fixed-point FIR filter: no most-negative number, no redundant sign bits

General fixed-point libraries size every result for the worst case, and the
worst case is almost always the *most-negative number* (MNN) of a
two's-complement word, the value `100…0` whose negation does not fit in the
same width. Because `-MNN` and `MNN × MNN` need an extra bit, such libraries
add one integer bit for every negation, one for every product, and one for
every addition in an accumulator chain. Those bits carry no information for
any other operand, but they cost adders, registers and delay.

This RTL is an 8-tap FIR filter, `Y = Σ A_i·X_i`, built the other way round:

1. **Take the MNN out at the inputs.** Every sample and every coefficient
   passes through a clamp that turns `-1.0` (`0x800` in 12 bits) into
   `-1.0 + 2^-11` (`0x801`). No other value changes. After that no negation,
   absolute value, sum or product inside the datapath can produce the MNN.
2. **Drop the product's redundant sign bit.** The full product of two MNN-free
   N- and M-bit operands fits in N+M-1 bits. So a 12×12 product is kept as 23
   bits, (1/0/22), not 24.
3. **Sum in a balanced tree.** Pairwise adds grow the word by one integer bit
   per level, so 8 terms need 3 more bits, not 7: (1/0/22) → (1/1/22) →
   (1/2/22) → (1/3/22). The 26-bit result has no redundant sign bit, since
   the sum of eight values each below 1 in magnitude is below 8.

A straightforward library expression chained as an accumulator would have
produced a 31-bit (1/8/22) output, with a product stage of (1/1/22). Dropping
those bits reduces the logic slightly. Regrouping the adders into a tree also
cuts the adder chain from seven adders to three.

## Number formats

Formats are written (S/I/F): sign bits, integer bits, fraction bits. A
(1/0/11) word is a 12-bit two's-complement fraction from -1.0 to
1 - 2^-11, with a resolution of 2^-11.

| signal | format | bits |
|---|---|---|
| `x_in`, `coef_in` | (1/0/11) | 12 |
| after the clamp | (1/0/11), never `0x800` | 12 |
| product | (1/0/22) | 23 |
| tree level 1 / 2 / 3 | (1/1/22) / (1/2/22) / (1/3/22) | 24 / 25 / 26 |
| `y_out` | (1/3/22) | 26 |

The filter never rounds or saturates. `y_out` is the exact sum of the exact
products, and the integer value of `y_out` equals `Σ A_i·X_i` over the 12-bit
integer codes.

**Why the clamp is enough.** For 12-bit operands the largest product
magnitude is then (2^11-1)^2 < 2^22, so 23 bits suffice. Only
(-2^11)·(-2^11) = 2^22 would need the 24th bit. Strictly, excluding the MNN
from one operand would be enough. This design clamps both: samples and
coefficients are both primary inputs, and the coefficients cost nothing
extra since they are clamped only when loaded.

**What the clamp costs.** An input of exactly -1.0 is read as
-1.0 + 2^-11, an error of one LSB. Signals that stay clear of full scale
never see it. `x_mnn_hit` and `coef_mnn_hit` report each time it happens.

## Structure

```
 x_in ──► mnn_clamp ──► sample_delay_line ──► taps[0..7] ─┐
                          (input register bank)           ├─► 8 × fx_mult ──► adder_tree ──► output reg ──► y_out
 coef_in ─► 8 × mnn_clamp ─► coefficient registers ───────┘   (23 bits)       (26 bits)
```

| module | file | role |
|---|---|---|
| `fir8_opt` | `rtl/fir8_opt.sv` | top: clamps, coefficient registers, multipliers, tree, output register, handshake |
| `mnn_clamp` | `rtl/mnn_clamp.sv` | replaces the MNN by MNN+1 (sets bit 0 when the word is `100…0`) |
| `sample_delay_line` | `rtl/sample_delay_line.sv` | shift register of the last `TAPS` samples; `taps[0]` is the newest |
| `fx_mult` | `rtl/fx_mult.sv` | signed multiply, keeps `WA+WB-1` bits, asserts the dropped bit was redundant |
| `adder_tree` | `rtl/adder_tree.sv` | generic balanced tree, `N` a power of two, one bit of growth per level |
| `fx_pkg` | `rtl/fx_pkg.sv` | default sizes and the width rules `prod_width` and `tree_width` |

Tap `i` is multiplied by coefficient `A_i`, so `y = A_0·x[n] + A_1·x[n-1] + … + A_7·x[n-7]`.

The multipliers and the adder tree are combinational and sit between two
register banks. The input side holds the coefficient registers and the delay
line, and the output side holds `y_out`. The critical path therefore runs
through one multiplier and three adders. Multiplication is written as `*` so
that a synthesis tool can map it onto hard multiplier blocks.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset, clears coefficients, taps and output |
| `coef_load` | in | 1 | latch all of `coef_in` at the next rising edge |
| `coef_in[TAPS]` | in | W | coefficients A_0…A_7 |
| `in_valid`, `x_in` | in | 1, W | one sample per cycle while `in_valid` is high |
| `out_valid`, `y_out` | out | 1, 26 | one output per accepted sample |
| `x_mnn_hit`, `coef_mnn_hit` | out | 1 | an input of -1.0 is being clamped this cycle |

- **Latency.** A sample accepted at rising edge E enters the delay line at
  E. The output that includes it is registered at E+1, and `out_valid` is
  high for the cycle after E+1.
- **Rate.** One sample and one output per cycle.
- **Stalls.** With `in_valid` low the delay line holds and no output is
  produced. There is no back-pressure: outputs must be taken when valid.
- **Coefficient loads.** A load at edge E is used by the output of a sample
  accepted at E or later.

Two concurrent assertions in `fir8_opt` check that no tap and no coefficient
register ever holds the MNN. An immediate assertion in `fx_mult` checks that
the discarded product bit always equals the sign bit.

## Parameters

`fir8_opt #(TAPS = 8, W = 12)`. The internal widths follow from these:
`PW = 2W-1` and `YW = PW + log2(TAPS)`. `TAPS` must be a power of two;
`adder_tree` stops elaboration otherwise. With `W = 12` the format is (1/0/11),
and any `W` gives (1/0/W-1).

## Where this design makes its own choices

The arithmetic (clamp, product width, tree grouping and widths) is the
method the design rests on. The following are choices of this RTL:

- The samples come from a streaming input through a shift register. Another
  system might present all eight samples in parallel.
- The coefficients are a run-time loadable register bank, loaded all at
  once. Nothing assumes particular coefficient values.
- The `in_valid`/`out_valid` handshake, the two-edge latency, the
  synchronous reset and the clamp status outputs.
- No pipelining inside the multiply/add path.

Not provided: FFT and IIR datapaths. The same bit-growth argument applies
to them: an FFT gains redundant bits at every twiddle multiplication, and an
IIR filter feeds them back. However, no structure for them is defined here.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_mnn_clamp`: all 4096 12-bit inputs.
- `tb_fx_mult`: corner products (largest magnitudes of both signs, zero, ±1
  LSB), plus 100 000 random MNN-free operand pairs, against 64-bit integer
  products.
- `tb_adder_tree`: all terms at the most-positive or most-negative 23-bit
  value, then each term alone (catches a misrouted input), then 20 000
  random sets.
- `tb_sample_delay_line`: random samples with a random shift enable and a
  mid-run reset, against a software shift register.
- `tb_fir8_opt`: the whole filter at its default sizes against an exact
  integer model. It runs several directed phases:
  - every operand at -1.0, so every product is the one that would need the
    extra bit without the clamp, and the sum is near +8;
  - every operand at full positive scale, then mixed signs, so the sum is
    near -8;
  - an impulse response;
  - 3000 random cycles with stalls, coefficient reloads mid-stream and
    frequent -1.0 inputs.

  Every output is checked for value and for arrival exactly two edges after
  its sample. Each mechanism must occur at least once: sample clamp,
  coefficient clamp, clamped×clamped product, stall, reload, |y| ≥ 4,
  back-to-back outputs.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/fx_pkg.sv tb/tb_fir8_opt.sv --top-module tb_fir8_opt -o sim
./obj_dir/sim
```
