# Improved logarithmic multiplier (ILM) and an ILM neuron

Neural-network inference spends most of its energy in multiplications. A
logarithmic multiplier replaces the multiplication with shifts and additions
by approximating each operand with a power of two. The classic (Mitchell)
approach always rounds an operand *down* to the power of two below it. As a
result its products are always too small, and those errors pile up in a dot
product instead of cancelling.

This design rounds each operand to its *nearest* power of two, up or down.
The leftover residues can then have either sign, so the product error has
either sign, and over many products the errors largely cancel. Three further
ideas keep the hardware small:

* a **nearest-one detector** that produces the rounded operand directly as
  a one-hot word, in two levels of logic;
* a **reduced full adder** for the last addition. One of its addends is
  one-hot, so two rows of the full-adder truth table can never occur, and
  the cell can be simplified;
* optionally (**ILM-k**), the *k* least significant bits of one adder are
  not computed at all. They are replaced by a fixed 1010... pattern.

This RTL follows the multiplier described in *"An Improved Logarithmic
Multiplier for Energy-Efficient Neural Computing"* (8-bit operands, 16-bit
product) and the three-input neuron used there to measure its cost. It is an
independent implementation in SystemVerilog. Where that description is
silent, the choices made here are listed under
[Departures and own choices](#departures-and-own-choices).

## The arithmetic

Write each operand as its nearest power of two plus a signed residue:

    A = 2^k1 + q1        B = 2^k2 + q2
    A*B = 2^(k1+k2) + q1*2^k2 + q2*2^k1 + q1*q2

The multiplier computes the first three terms and drops `q1*q2`. Its error is
therefore exactly `-q1*q2`:

* The error is negative when both operands were rounded the same way.
* The error is positive when one operand was rounded up and the other down.
* The error is zero when either operand is a power of two.

Rounding rule: let the leading one of N be at bit k, so `2^k <= N < 2^(k+1)`.
N is rounded up to `2^(k+1)` exactly when bit `k-1` of N is set, which is
when `N >= 1.5 * 2^k`. A value exactly halfway (3, 6, 12, 24, ...) therefore
rounds up.

**Cap at 2^(W-1).** The detector's output is W bits wide, the same as its
input. So it never returns 2^W: every operand of 128 or more (for W = 8)
rounds to 128, even 255, whose nearest power is 256. This is a deliberate
simplification. Trained network weights are concentrated near zero, and with
the 8-bit sign-magnitude words of the neuron the magnitudes are at most 127,
so the cap never acts there. For general unsigned 8x8 use it is not free:
the worst error becomes `-127*127 = -16129` at 255 x 255.

## Datapath

```
 A ──► ilm_nod ──2^k1──► ilm_pe ──k1──┬──────────────► ilm_shifter(q2 << k1) ─┐
  │               │                   │                                       │
  └──► ilm_residue_sub ◄──┘           └─► ilm_exp_adder ─► ilm_decoder        │
                 │ q1                      (k1+k2)        │ 2^(k1+k2)          │
                 ▼                                        │                   ▼
        ilm_shifter(q1 << k2) ─────────────────────► ilm_approx_adder ◄───────┘
                                                          │ q1*2^k2 + q2*2^k1
                                                          ▼
                                   2^(k1+k2) ──► ilm_onehot_adder ──► A x B
 (B mirrored: ilm_nod, ilm_pe -> k2, ilm_residue_sub -> q2)
```

Everything is combinational; no clock or register is involved.

| Module | Role |
|---|---|
| `ilm_nod` | Nearest-one detector: operand → one-hot `2^k` (capped, 0 for 0). |
| `ilm_pe` | One-hot → exponent `k`. Each output bit is the OR of the input bits whose index has that bit set, e.g. `k[0] = a1|a3|a5|a7`. |
| `ilm_residue_sub` | `q = A − 2^k`, W-bit two's complement. With the cap, q lies in [−32, 127] for W = 8. |
| `ilm_shifter` | Sign-extends q to 2W bits, then shifts it left by the other operand's exponent. |
| `ilm_exp_adder` | `k1 + k2`. |
| `ilm_decoder` | `k1 + k2` → one-hot `2^(k1+k2)`. |
| `ilm_approx_adder` | Sum of the two shifted residues: exact, or ILM-k (below). |
| `ilm_prop_fa` | Reduced full adder cell. |
| `ilm_onehot_adder` | Ripple chain of `ilm_prop_fa`: adds the one-hot term. |
| `ilm_mult` | The unsigned W x W multiplier wiring all of the above. |
| `ilm_signmag_mult` | Signed use: XOR of the signs, ILM on the magnitudes. |
| `ilm_neuron` | Top: N_IN sign-magnitude products, adder chain, ±127 limit. |
| `ilm_pkg` | Widths and the 8-bit sign-magnitude struct `sm8_t`. |

### Nearest-one detector

Output bit j is set when no input bit above j is set and one of these holds:

* bit j is set and bit j−1 is clear (round down to `2^j`), or
* bit j is clear and bits j−1 and j−2 are set (round up from `2^(j−1)`).

The edges of the word need special terms:

* The top output is `I[W−1] | (I[W−2] & I[W−3])`. This term produces the cap.
* Output bit 1 only has the round-down case, because 3 rounds up to 4.
* Output bit 0 is set only for an input of 1.

The "no bit above" terms form a chain evaluated from the MSB down.

### The reduced full adder

Let `a` be the one-hot addend. Below its set bit every `a` bit is 0, so no
carry is generated there. So `a = 1` never meets `carry-in = 1`. Treating
those two truth-table rows as don't-cares gives:

    sum  = ~b&cin | ~a&b&~cin | a&~b
    cout =  a&b   |  b&cin

On every reachable input this is exact. The final adder is therefore exact,
only cheaper than a normal ripple adder.

### ILM-k: the approximate residue adder

With `APPROX_BITS = k > 0`, `ilm_approx_adder` adds only the upper bits of the
two shifted residues. The upper part gets no carry from below. The low k sum
bits are set to an alternating pattern that starts with 1 at bit k−1, so
k = 5 gives `10101`. The pattern lies near the middle of the dropped range, so
this adder errs both ways and the multiplier's error stays two-sided. For odd
k (5 and 9, the variants of interest) the pattern has a 1 at both ends.

Consequence for tiny operands: the fixed low bits can make the residue sum
more negative than `2^(k1+k2)`. Take 3 x 1 with k = 5: the exact sum
`−1 + 4 = 3` becomes `−11 + 4 = −7`. The ILM-k variants therefore do the final
addition one bit wider and return 0 when the result is negative, instead of
wrapping to a product near 65535. The ILM-0 result can never be negative
(`A*B − q1*q2 ≥ 0`), so it keeps the plain 16-bit adder.

## Signed operation and the neuron

Signed operands are in sign-magnitude form. The product sign is the XOR of
the operand signs. The magnitude comes from the unsigned ILM. A zero product
may carry sign 1 ("−0") out of `ilm_signmag_mult`.

`ilm_neuron` is the top. It computes

    y = limit_±127( Σ_i  x_i * w_i )      (i = 0 .. N_IN−1, default N_IN = 3)

* Its ports `i_x`, `i_w` (unpacked arrays) and `o_y` are `ilm_pkg::sm8_t`: a
  sign bit and a 7-bit magnitude, range [−127, 127].
* Each 7-bit magnitude is zero-extended into the 8 x 8 ILM.
* The signed 16-bit products are turned into two's complement and summed by
  a chain of N_IN−1 adders. With three inputs that is two adders.
* The sum is hard-limited to ±127 without any scaling, so the output can
  feed another layer in the same format.
* A zero output always has sign 0.
* There is no bias input and no activation function. Saturation is the only
  non-linearity. Add a bias or a ReLU/sigmoid stage outside if your network
  needs one.

Parameters of the top: `N_IN` (default 3) and `APPROX_BITS` (default 0, the
exact ILM-0). Setting `APPROX_BITS = 5` gives the ILM-5 neuron, the
lowest-energy variant of this family.

## Accuracy (measured on this RTL)

The numbers below come from `tb_ilm_mult` (all 65,536 pairs) and
`tb_ilm_mult_error` (10^6 random pairs per distribution). The error is
`Pa − Pe`. MRED is the mean of `|Pa − Pe| / Pe`. NMED is the mean
`|Pa − Pe|` divided by 65025.

| Operands | Variant | mean error | MRED | NMED |
|---|---|---|---|---|
| uniform 0..255 | ILM-0 | −988.7 | 0.0561 | 0.0211 |
| uniform 0..255 | ILM-5 | −969.7 | 0.0606 | 0.0211 |
| uniform 0..255 | ILM-9 | −1057.3 | 0.1596 | 0.0223 |
| \|N(0,1)\|·255/4, clipped | ILM-0 | −3.15 | 0.0278 | 0.0012 |
| \|N(0,1)\|·255/4, clipped | ILM-5 | 11.90 | 0.0655 | 0.0012 |
| \|N(0,1)\|·255/4, clipped | ILM-9 | −80.3 | 0.7388 | 0.0035 |

Over the full 8-bit range, 23,184 of the 65,536 products are too large and
37,825 too small. The worst error is −16129.

The large negative mean error for uniform operands comes from the cap at
128: operands in 192..255 are rounded to 128 instead of 256. A detector
without the cap (9-bit output) would have a mean error of about −0.25 and an
MRED of about 0.029 for ILM-0 on the same uniform range. That matches the
accuracy usually quoted for this multiplier. So quoted full-range error
figures describe the uncapped rounding. For operands below 192, including
all 7-bit magnitudes of the neuron, the two detectors behave identically.

## Departures and own choices

These points are not fixed by the published description and were decided
here:

* Zero operands force the product to 0. The detector alone would return the
  other operand for `0 x B`.
* The residues are W-bit two's complement and are sign-extended before
  shifting.
* The residue adder and the one-hot adder are 16 bits wide. They are
  sometimes described as 8-bit adders, but the product has 16 bits.
* ILM-k details: the pattern starts with 1 at bit k−1, there is no carry out
  of the approximated bits, and negative ILM-k results are clamped to 0.
* The rounding tie (N = 1.5·2^k) goes up, following the rounding rule "round
  down only if strictly closer".
* Neuron: two's-complement accumulation, no bias, no activation, a sign-0
  zero output, and a combinational design with no pipeline registers.
* Structure inside the simple blocks (PE, decoder, adders) is the obvious
  one. The NOD follows the published two-level circuit. The reduced full
  adder follows its published equations.

Not included: the networks used to evaluate the multiplier (a 784-128-10 MLP
and a small AlexNet-style CNN). A complete accelerator would also need weight
and activation storage, layer sequencing, activation functions and pooling,
and none of these are specified.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. It compares the RTL with the arithmetic
reference functions in `tb/ilm_ref_pkg.sv`. Those functions compute the
nearest power of two with integer loops, not with the RTL's bit logic.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ilm_pkg.sv tb/ilm_ref_pkg.sv tb/tb_ilm_neuron.sv \
    --top-module tb_ilm_neuron
./obj_dir/Vtb_ilm_neuron
```

Verilator finds the other modules through `-Irtl`. Replace the testbench name
to run another one.

| Testbench | What it covers |
|---|---|
| `tb_ilm_neuron` | The top at its default parameters: 20,000 random and directed neuron evaluations. It counts operands rounded down, rounded up, rounded up to 128, and zero. It also counts negative products, +/− saturation and in-range outputs, and fails if any of these never happened. |
| `tb_ilm_mult` | All 65,536 pairs for ILM-0, ILM-5 and ILM-9. Checks error = −q1·q2, both error signs, worst case −16129, and that the ILM-k clamp occurs. |
| `tb_ilm_mult_error` | 10^6 uniform and 10^6 normal-distributed pairs. Prints the statistics above. |
| `tb_ilm_neuron_variants` | The three-input neuron with ILM-5 and ILM-9 multipliers, 10,000 evaluations. Checks that negative ILM-k sums get clamped. |
| `tb_ilm_neuron_mlp` | A 784-input neuron (`N_IN = 784`) computing all 128 hidden-layer dot products of an MLP-sized layer on synthetic image and weight data. Building it takes several minutes. |
| `tb_ilm_nod`, `tb_ilm_pe`, `tb_ilm_residue_sub`, `tb_ilm_shifter`, `tb_ilm_exp_adder`, `tb_ilm_decoder`, `tb_ilm_approx_adder`, `tb_ilm_prop_fa`, `tb_ilm_onehot_adder`, `tb_ilm_signmag_mult` | Exhaustive or random unit tests of each block. |

When extending a testbench, initialise module-level counters in their
declarations. Verilator 5.050 was seen to lose updates to counters that were
only reset inside the `initial` block, at its default optimisation level.

## Changing the design

* `W` (operand width) is a parameter of every multiplier block and needs
  W ≥ 3. Widths other than 8 follow the same rules but have only been
  checked at 8 bits.
* `APPROX_BITS` selects ILM-0 (exact residue adder) or ILM-k.
* `N_IN` sets the neuron's fan-in. The accumulator widens with
  `$clog2(N_IN + 1)`.
