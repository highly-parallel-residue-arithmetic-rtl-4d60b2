# Radix-5 coded residue arithmetic: a carry-limited three-operand multiply adder

Residue number systems (RNS) add and multiply without carries between residues,
but each residue still has to be added and multiplied modulo some awkward odd
number m. This design removes that last difficulty. Every residue is written as
a short vector of radix-5 signed digits chosen so that

* multiplying by any constant is a **rotation of the digit vector plus sign
  inversions** (no arithmetic at all), and
* adding three residues takes **one digit-level adder stage and one decoder
  stage**: no carry ever travels more than one digit position, and the
  reduction modulo m costs nothing.

The result is a multiply-add `s = a*x + b*y + c*z` whose delay does not depend
on the modulus or on the word length. The original circuit was built in
multiple-valued, bidirectional current-mode CMOS. Each digit was a current whose
direction gives the sign and whose size gives the magnitude, and wired
junctions did the additions. This RTL models the same circuit at digit level:
every current becomes a small two's-complement integer.

Two configurations are provided:

* `mod7_test_chip`: a fixed mod 7 multiply adder computing `s = |2x + 3y - 2z|_7`.
  Next to it are a stand-alone signed-digit full adder and a stand-alone
  decoder for characterisation.
* `rns_multiply_adder`: a full-width RNS multiply adder over the 13 moduli
  {7, 11, 17, 19, 23, 37, 43, 47, 53, 59, 73, 79, 83}. Their product is about
  2^65.8, enough to hold a 32 x 32-bit three-operand multiply-add exactly. It
  has 269 digits, programmable coefficients, and one mod-m multiply adder per
  modulus.

`rns_top` puts both side by side. It also includes real-valued,
current-level behavioural models of the two characterisation cells (section 6).

## 1. The digit coding

The RNS is symmetric: a residue modulo odd m is the remainder of least
magnitude, in `-(m-1)/2 .. (m-1)/2`. Take the powers `|5^0|_m, |5^1|_m, ...`. For
the moduli used here, 5 has two properties:

* the magnitudes of the first n = (m-1)/2 powers are exactly 1, 2, ..., n in
  some order;
* `|5^n|_m` is +1 or -1. It is -1 for 7, 17, 23, 37, 43, 47, 53, 73, 83 and 97,
  and +1 for 11, 19, 59 and 79.

A residue is then held as n digits `x_j` in {-2..2} with value
`sum_j x_j * 5^j (mod m)`. The coding is redundant: many digit vectors have the
same value. That redundancy is what makes three-operand addition possible.

Modulo 7 there are three digits, with weights `5^0 = 1`, `5^1 = -2`,
`5^2 = -3`, and `5^3 = -1`. So `(x2, x1, x0)` means `-3*x2 - 2*x1 + x0 (mod 7)`.

Digits use these types (`rns_pkg`):

| type     | bits | range    | meaning                              |
|----------|------|----------|--------------------------------------|
| `sd_t`   | 3    | -2..2    | operand/result digit                 |
| `lsum_t` | 4    | -6..6    | wired sum of three digits            |
| `ssum_t` | 3    | -3..3    | partial sum plus incoming carry (s') |
| `tri_t`  | 2    | -1..1    | carry, decoder outputs q and q'      |

All multi-digit ports are packed arrays of these types, digit 0 (weight 5^0)
at index 0.

## 2. Multiplication is rotation

Every nonzero coefficient equals `+-5^k (mod m)` for exactly one k in 0..n-1.
Multiplying by 5^k moves digit j to position j+k. A digit pushed past the top
re-enters at position 0 multiplied by `|5^n|_m`, which is +1 or -1. That is a
plain wire or a sign inverter on the wrap-around diagonal. A negative
coefficient inverts every product digit.

Mod 7 example: `5^0 = 1`, `5^1 = -2`, `5^2 = -3`. So

| coefficient | operation                                |
|-------------|------------------------------------------|
| 1           | none                                     |
| -1          | invert                                   |
| -2          | rotate by 1 (wrapped digit inverted)     |
| 2           | rotate by 1, then invert                 |
| -3          | rotate by 2 (wrapped digits inverted)    |
| 3           | rotate by 2, then invert                 |
| 0           | all digits 0                             |

Two multipliers use this idea:

* `mod_multiplier` is a barrel shifter with a one-hot control `sel` (bit k
  selects 5^k; all-zero gives product 0) and a `neg` input for the sign.
* `mod_const_multiplier` is the same thing with a constant coefficient, so it
  reduces to fixed wiring plus `sd_sign_inverter`s. Some of its outputs are
  plain wires from inputs; that is intended.

Neither changes the digit range, so products are valid operands.

## 3. Three-operand addition (the hard part)

`mod_three_operand_adder` adds three n-digit operands. Every digit position j
goes through the same steps:

1. **Wired sum.** `z_j = a_j + b_j + c_j`, in -6..6.
2. **SDFA** (`r5_sdfa`, radix-5 signed-digit full adder). It splits `z_j` into
   `5*c_j + w_j`: if `z > 2` then `c = 1` and `w = z - 5`; if `z < -2` then
   `c = -1` and `w = z + 5`; otherwise `c = 0` and `w = z`. So w is in -2..2.
3. **Carry in.** `s'_j = w_j + c_(j-1)`, in -3..3. The top carry `c_(n-1)` has
   weight 5^n, which is `+-1 (mod m)`. It therefore enters position 0 directly,
   inverted when `|5^n|_m = -1`. This **end-around carry** is the whole mod-m
   reduction. No carry moves more than one position.
4. **Decoder** (`sd_decoder`). `s'` does not fit the operand range -2..2, so
   it is split into `s' = q + 2*q'` with q and q' in {-1,0,1}:

   | s'  | 0 | ±1 | ±2 | ±3 |
   |-----|---|----|----|----|
   | q   | 0 | ±1 | 0  | ±1 |
   | q'  | 0 | 0  | ±1 | ±1 |

5. **Routing of q'.** The value `2*q'_j*5^j` must be placed somewhere. Because
   every residue is ±(a power of 5), `2*5^j = sigma_j * 5^k (mod m)` for one
   position k and a sign sigma_j. `q'_j` is therefore wired into position k,
   inverted when sigma_j = -1. For m = 7 this gives:
   * q'_0 goes to digit 1, inverted;
   * q'_1 goes to digit 2, inverted;
   * q'_2 goes to digit 0, not inverted.
6. **Final wired sum.** `s_k = q_k + (routed q')`, which is in -2..2. The
   result is again a valid operand.

Worked example, mod 7. Suppose step 3 yields `(s'_2, s'_1, s'_0) = (3, -2, 3)`.

* The decoders give `(q, q')` = (1, 1), (0, -1), (1, 1) for digits 2, 1, 0.
* The routed q' values arriving at digits 2, 1, 0 are:
  * digit 2 receives q'_1 inverted, which is +1;
  * digit 1 receives q'_0 inverted, which is -1;
  * digit 0 receives q'_2, which is +1.
* The result is `(s_2, s_1, s_0) = (2, -1, 2)`.

Both vectors have value 6 = -1 (mod 7). `tb_mod_three_operand_adder` drives
operands that produce exactly this s' and checks those output digits.

The routing (k, sign) and the wrap signs are not hand-drawn. They are computed
from the modulus at elaboration time by the constant functions in `rns_pkg`
(`pow5`, `wrap_sign`, `log5`, `qp_dest`, `qp_sign`, `qp_src`). Setting the `M`
parameter to any modulus for which 5 has the two properties above yields the
correct wiring. Any other modulus (13, for example) stops elaboration with an
error.

## 4. Module hierarchy

```
rns_top
├── mod7_test_chip
│   ├── mod7_multiply_adder          s = |2x + 3y - 2z|_7
│   │   ├── mod_const_multiplier x3  (wiring + sd_sign_inverter)
│   │   └── mod_three_operand_adder  (r5_sdfa x3, sd_decoder x3)
│   ├── r5_sdfa                      stand-alone
│   └── sd_decoder                   stand-alone
├── rns_multiply_adder               13 moduli, 269 digits
│   └── mod_multiply_adder x13       s = |a*x + b*y + c*z|_m
│       ├── mod_multiplier x3        barrel shifter + sd_sign_inverter
│       └── mod_three_operand_adder
├── cm_sdfa                          current-level model (real), behavioural
│   └── cm_bci, cm_current_mirror, cm_threshold_detector (-> cm_current_source)
└── cm_decoder                       current-level model (real), behavioural
    └── cm_bci, cm_current_mirror, cm_mtd, cm_threshold_detector
```

| module | parameters (default) | function |
|---|---|---|
| `rns_pkg` | – | types, moduli set, constant functions for the wiring |
| `sd_sign_inverter` | – | `dout = -din` |
| `r5_sdfa` | – | `z -> (w, c)` |
| `sd_decoder` | – | `s' -> (q, q')` |
| `mod_multiplier` | `M` (7) | `p = (neg ? -1 : 1) * 5^k * x`, where `sel` = one-hot k |
| `mod_const_multiplier` | `M` (7), `COEF` (2) | `p = COEF * x` by wiring |
| `mod_three_operand_adder` | `M` (7) | `s = a + b + c` |
| `mod_multiply_adder` | `M` (7) | `s = a*x + b*y + c*z`, coefficients as (sel, neg) |
| `mod7_multiply_adder` | `CA, CB, CC` (2, 3, -2) | fixed-coefficient mod 7 unit |
| `mod7_test_chip` | – | multiply adder + stand-alone SDFA and decoder |
| `rns_multiply_adder` | `MODULI` (13 moduli above) | one `mod_multiply_adder` per modulus |
| `rns_top` | – | both configurations and the current-level cells side by side |
| `cm_current_source` | `MOUT` (1.0) | behavioural: `y = xn ? 0 : MOUT` |
| `cm_current_mirror` | `A` (1.0) | behavioural: `y = -A*x` |
| `cm_threshold_detector` | `T` (2.5), `MOUT` (1.0) | behavioural: `y = x > T ? MOUT : 0` |
| `cm_mtd` | `T1, T2, MOUT` (0.5, 1.5, 1.0) | behavioural: `y = T1 <= x <= T2 ? MOUT : 0` |
| `cm_bci` | – | behavioural: splits a current into its positive and negative branches |
| `cm_sdfa` | – | behavioural SDFA: current z in, currents -w and c out |
| `cm_decoder` | – | behavioural decoder: current s' in, currents q and q' out |

### Flattened RNS layout

In `rns_multiply_adder` and `rns_top`, modulus i occupies digits
`digit_offset(i) .. digit_offset(i) + (m_i-1)/2 - 1` of `x`, `y`, `z`, `s` and
of the one-hot controls `sel_a/b/c`. The moduli go in list order, so 7 takes
digits 0..2, 11 takes 3..7, and so on up to 83, which takes 228..268. The
sign controls `neg_a/b/c` carry one bit per modulus.

To set coefficient value v for modulus m, find k and sign with
`v = sign * 5^k (mod m)`. Then set bit `digit_offset(i) + k` of `sel` and put
`sign < 0` on `neg`. For v = 0, leave all of that modulus's `sel` bits at zero.

Conversion between binary integers and residues is not part of the hardware.
`tb_rns_top` shows how: symmetric residues in, Chinese-remainder reconstruction
out.

## 5. Timing

Everything is combinational: there are no clocks, registers or reset. In the
current-mode circuit, the multiply-add delay is one pass switch, one inverter,
one SDFA and one decoder, whatever the modulus. In this RTL the logic depth is
the same at every modulus. If the unit is used in a clocked system, registers
go around `mod_multiply_adder` or `rns_multiply_adder`.

## 6. Current-level models

In silicon, each digit is a current, about 50 uA per unit, and the cells are
built from five primitives:

* a switched current source;
* current mirrors, which copy a current with reversed direction and a scale
  factor;
* threshold detectors TD(T, m), which output m units when the input exceeds T;
* window detectors MTD(T1, T2 : m), which output m units inside [T1, T2];
* a bidirectional input stage, which sends positive and negative current into
  separate branches.

The `cm_*` modules are behavioural models of these primitives. Currents are
`real` values in units of the unit current, switching is ideal and
instantaneous, and nothing in them is synthesizable. From the primitives they
assemble the two cells:

* **`cm_sdfa`:** the input current z is split by polarity. Each branch feeds a
  TD(2.5, 5) and a TD(2.5, 1). The 5-unit outputs correct the partial sum and
  the 1-unit outputs form the carry. The outputs are `c` and the inverted
  partial sum `-w`, as the real cell delivers it. Swept over z, `-w` is a
  sawtooth with jumps at ±2.5 and `c` is a three-level staircase.
* **`cm_decoder`:** each polarity branch feeds MTD(0.5, 1.5 : 1) and TD(2.5, 1),
  which together form q, and TD(1.5, 1), which forms q'. The outputs are
  re-quantized to whole units, which restores levels that the SDFA does not.

At integer inputs these models match `r5_sdfa` and `sd_decoder` exactly;
`tb_rns_top` checks that. Between integer levels they show where the
thresholds lie. Level error, noise margin, slopes and delay are not modelled.

## 7. What is modelled and what is not

Taken directly from the source design:
* the radix-5 coding with 5 as the root;
* the SDFA equations and thresholds (2.5 units);
* the decoder thresholds (q: window 0.5..1.5 and above 2.5; q': above 1.5);
* the end-around carry and the q' routing rule;
* the barrel-shifter multiplier with one-hot controls;
* the mod 7 unit's coefficients (2, 3, -2);
* the test-chip contents;
* the 13-modulus set.

Choices made in this RTL:
* **Currents become integers** in the synthesizable part. The analog cells
  (current source, current mirrors, threshold and window detectors, and the
  bidirectional input stage) appear only as the behavioural `cm_*` models of
  section 6. In the synthesizable RTL, their combined effect is the comparisons
  inside `r5_sdfa` and `sd_decoder`. The wiring inside `cm_sdfa` and
  `cm_decoder` is derived from the cell equations, using the detector sets of
  the cells. Noise margin and threshold-voltage spread are not modelled.
* **SDFA output polarity.** The circuit delivers the partial sum inverted
  (-w). The RTL outputs +w. This only moves a sign inverter.
* **Sign control of the programmable multiplier.** The circuit obtains -5^k
  products by inverting the shifter outputs. The RTL adds an explicit `neg`
  input per multiplier to select that.
* **Several `sel` bits set.** In silicon this shorts paths. In the RTL, the
  highest set bit wins. Drive `sel` one-hot or all-zero.
* **Mod 7 wiring.** The RTL derives the wiring of the fixed mod 7 unit from the
  coefficients. In particular, digit 1 of 2x is -x_0, so that wire carries an
  inverter.

The output of every adder is a correct but **non-canonical** coding: it has
the right value mod m, with digits in -2..2. Compare results by value
(`sum s_j 5^j mod m`), never digit by digit.

## 8. Simulation

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/rns_pkg.sv tb/tb_rns_ref_pkg.sv tb/tb_rns_top.sv \
    --top-module tb_rns_top -o sim
./obj_dir/sim
```

Replace `tb_rns_top` with any other testbench name. `tb_rns_ref_pkg` holds the
reference arithmetic. It is written from the number-system definitions and
does not reuse the RTL package.

| testbench | what it checks |
|---|---|
| `tb_sd_sign_inverter`, `tb_r5_sdfa`, `tb_sd_decoder` | full input ranges of the cells |
| `tb_mod_multiplier` | m = 7: all codings x all coefficients, and the published mod 7 product table digit for digit; m = 11, 83: random |
| `tb_mod_const_multiplier` | m = 7: all 7 coefficients x all codings; m = 19: coefficients 5 and -9 |
| `tb_mod_three_operand_adder` | the worked example above; random sums at m = 7, 11, 19, 83 |
| `tb_mod7_multiply_adder` | all 125^3 operand codings |
| `tb_mod_multiply_adder` | m = 7: all 343 coefficient triples; m = 59, 83, 97: random |
| `tb_mod7_test_chip` | the three parts of the test chip |
| `tb_rns_multiply_adder` | 2000 random vectors, every modulus checked |
| `tb_cm_current_source`, `tb_cm_current_mirror`, `tb_cm_threshold_detector`, `tb_cm_mtd`, `tb_cm_bci` | primitive models swept over their input currents |
| `tb_cm_sdfa`, `tb_cm_decoder` | transfer curves of the current-level cells, in steps of 0.05 unit |
| `tb_rns_top` | end to end at full size (see below) |

`tb_rns_top` runs the design at its default size:
* It draws signed 32-bit A, X, B, Y, C, Z.
* It encodes each as a random redundant coding per modulus.
* It checks every result residue.
* It rebuilds the integer by the Chinese remainder theorem and compares it
  with `A*X + B*Y + C*Z` computed in 128-bit arithmetic.
* It counts how often each mechanism fired, and fails if one never did:
  * positive and negative carries;
  * end-around carries, inverted and plain;
  * routed q';
  * shifter wrap-around;
  * negative and zero coefficients.
* It checks the current-level cells against the digit-level ones at every
  integer level.

All testbenches pass. Each finishes in well under a second.

## 9. Size

After coarse synthesis, `rns_multiply_adder` is about 11,300 word-level cells
and `mod7_test_chip` about 120. Nearly all of it is the 39 barrel shifters and
269 SDFA/decoder pairs of the 13-modulus unit. There are no flip-flops or
memories. `rns_top` as a whole cannot be synthesized because it contains the
`real`-valued `cm_*` models. Synthesize `rns_multiply_adder` or
`mod7_test_chip` instead.
