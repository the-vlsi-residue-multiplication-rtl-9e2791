# Residue-number-system multiplication without division

In a residue number system (RNS) an integer X is held as its remainders
α_i = X mod m_i for a set of pairwise coprime moduli m_1 … m_s. Addition and
multiplication then split into s small independent operations, one per
modulus, with no carries between them. The catch is the modular
multiplication itself: each digit product α_i·β_i must be reduced modulo m_i,
which normally means either a division or a large look-up table
(a 64 k-word ROM for 8-bit moduli, 4 G-words for 16-bit ones).

This RTL reduces modulo m with three ordinary binary multiplications, two
subtractions and a 2-to-1 multiplexer. The modulus can be anything, since
nothing depends on its form, and the hardware grows with the square of the
digit width instead of exponentially. The same reduction structure also
gives a fast binary-to-residue converter, and, applied to the modulus M of
the whole system, a residue-to-binary converter. Chaining the three gives an
integer multiplier that computes in residue form. That chain is the top
level here.

Default configuration: five 8-bit moduli {255, 254, 253, 251, 247},
M = 1 015 933 059 570 (just above 10^12), with a 40-bit binary side.

## The reduction: a quotient estimate that is never more than one short

Let p be a W-bit unsigned number (for the multiplier, W = 2b, where b is
the digit width, and p = α·β). Let t = ⌊2^W / m⌋ be 1/m truncated to W
fractional bits, so

    t·2^-W ≤ 1/m < (t + 1)·2^-W.

The estimate k̄ = ⌊p·t / 2^W⌋ differs from the true quotient
k = ⌊p/m⌋ by less than p·2^-W < 1 before the floor. So k̄ is either k or
k − 1, and

    D = p − k̄·m   lies in [0, 2m).

One comparison with m finishes the job: the result is D when D < m and
D − m otherwise. Because D < 2m ≤ 2^(b+1), the subtraction only needs the
low b+1 bits of p and of k̄·m, and only the low b+1 bits of k̄ matter. This
is why every adder in the structure is b+1 bits wide even though p is 2b
bits wide.

Worked example (moduli 7, 11, 13; 37·12 = 444):

| modulus | α·β | t (r bits) | k̄ | p − k̄m | result |
|---|---|---|---|---|---|
| 7 (b=3) | 2·5 = 10 | .001001 (9/64) | 1 | 3 | 3 |
| 11 (b=4) | 4·1 = 4 | .00010111 (23/256) | 0 | 4 | 4 |
| 13 (b=4) | 11·12 = 132 | .00010011 (19/256) | 9 | 15 | 15 − 13 = 2 |

Only the modulus-13 lane needs the second subtraction. The residues
⟨3, 4, 2⟩ are those of 444. `tb_modmul` and `tb_rns_example_7_11_13`
replay this example.

## Modulo-m multiplier (`modmul`, `mod_reduce`)

```
 α (b) ─┐  β (b)
        MULTIPLIER1 ──p (2b)──────────────────────────┐ low b+1 bits
 REGISTER T ─t (2b)─┐                                  │
        MULTIPLIER2 (p·t) ─R (4b)─ bits [2b .. 3b] = k̄ │
 REGISTER M ─m (b)──┐          │                       │
        MULTIPLIER3 (k̄·m) ─C (low b+1 bits)─────► ADDER1: D = p − C  (b+1)
                                                       │
                                         ADDER2: D − m ─┤ sign bit
                                                       ▼
                              MULTIPLEXER: sign ? D : D − m  ──► π (b)
```

`mod_reduce` is everything from MULTIPLIER2 down. An assertion in it
checks that D < 2m for every valid result; it fires when t does not match
m, for example after a wrong value is loaded into REGISTER T. It takes the number to
reduce, t and m as inputs, and also drives `corr`, which is high when the
second subtraction was taken. `modmul` adds MULTIPLIER1 and the two
registers. REGISTER M and REGISTER T reset to the `MOD` parameter and
⌊2^(WA+WB)/MOD⌋. They can be reloaded at run time through `cfg_we`,
`cfg_m` and `cfg_t`, with t worked out by the caller. One instance
therefore serves any modulus.

For 8-bit digits the multipliers are 8×8, 16×16 and 9×8. The estimate field
is b+1 bits, so MULTIPLIER3 is one bit wider than the digits.

### Wider moduli: `split_mul`

Doubling the digit width to 16 bits makes MULTIPLIER2 a 32×32 multiplier.
`split_mul` builds it from four 16×16 multipliers and two adders:

    X = X1·2^16 + X2,  Y = Y1·2^16 + Y2
    XY = {X1Y1, X2Y2} + X1Y2·2^16 + X2Y1·2^16

X1Y1 and X2Y2 do not overlap, so they are placed side by side and cost no
adder. The four products are formed in parallel, so the multiply costs only
two extra addition times. Set `SPLIT = 1` on `modmul`, `rns_mul`,
`mod_reduce` or the top level (where it reaches the multiplier lanes only)
to use it. The 16-bit lanes are tested by `tb_rns_mul_16bit` with five
16-bit primes, and the whole integer multiplier at that size by
`tb_rns_int_multiplier_16bit`.

## RNS multiplier (`rns_mul`)

This is S `modmul` lanes side by side, one per modulus. The lanes share
nothing except the clock, so the whole unit is as fast as one lane.
Overflow detection and scaling are not part of it: a product that leaves
[0, M) wraps modulo M.

## Binary to residue (`residue_digit`, `bin2res`)

A binary X below M (n = ⌈log2 M⌉ bits) is reduced modulo m_i in the same
way, but without MULTIPLIER1. The input itself is what gets reduced.
"ROM1" holds t = ⌊2^n / m_i⌋ (1/m_i over n fractional bits) and "ROM2"
holds m_i. Both are elaboration-time constants. Since X < 2^n the estimate
is again at most one short. `bin2res` is S such digit converters fed with
the same X.

## Residue to binary (`res2bin`, `adder_tree`)

By the Chinese remainder theorem

    X = | Σ P_i·α_i |_M,   P_i = M_i·|M_i^-1|_(m_i),  M_i = M / m_i.

The weights P_i are worked out at elaboration by `rns_pkg::crt_weight`. For
the default moduli they are below M < 2^40. The converter has three parts:

1. S modulo-M multipliers. Each is a `modmul` with an 8-bit and a 40-bit
   operand and a 40-bit modulus, forming |α_i·P_i|_M.
2. `adder_tree`: ⌈log2 S⌉ levels of two-input adders. An odd word at the
   end of a level passes through unchanged. The sum is below S·M and
   occupies n + ⌈log2 S⌉ = 43 bits.
3. A final reduction of that 43-bit sum modulo M. This is a
   `residue_digit` with `MOD = M`: the same structure as one digit of the
   direct converter, only wider.

## Integer multiplier (`rns_int_multiplier`, top level)

```
x ─► sign map ─► bin2res ─┐
                          ├─► rns_mul ─► res2bin ─► sign unmap ─► prod
y ─► sign map ─► bin2res ─┘
```

* **Unsigned mode** (`signed_mode = 0`): `prod = x·y mod M`, which is the
  exact product whenever x·y < M.
* **Signed mode** (`signed_mode = 1`): x and y are 40-bit two's complement
  numbers. A negative value v enters as M − |v|. M is even, so at the
  output a value R ≥ M/2 stands for R − M, and it is returned in two's
  complement. The product is exact when it lies in [−M/2, M/2). The mode
  bit is sampled with the operands and travels down the pipeline with them,
  so the two modes can be mixed cycle by cycle.

There is one direct converter per operand, so a new operand pair can enter
on every cycle.

## Timing

All blocks carry an `in_valid`/`out_valid` bit alongside the data. With
`PIPE = 0` a block is purely combinational (clock and reset unused, apart
from the modulus registers of `modmul`). With `PIPE = 1` a register sits at
the output of every multiplier and every adder-tree level. The other data
(the low bits of p, the modulus) are delayed to stay aligned. Every
pipelined block accepts one operand set per cycle.

| block | PIPE = 1 latency (cycles) |
|---|---|
| `mod_reduce`, `residue_digit`, `bin2res` | 2 |
| `modmul`, `rns_mul` | 3 |
| `adder_tree` (5 inputs) | 3 |
| `res2bin` (5 moduli) | 3 + 3 + 2 = 8 |
| `rns_int_multiplier` | 2 + 3 + 8 = 13 |

`modmul` and `rns_mul` default to `PIPE = 0`, the unpipelined arrangement.
The top level defaults to `PIPE = 1`. Reloading a `modmul`'s registers
affects only operands that enter after the load. Reset is asynchronous
and active low. It clears the pipeline valid bits and loads the modulus
registers. Simulate at least one reset before use.

## Parameters and constants

`rns_pkg` holds the default system (`S = 5`, `B = 8`, `N_BITS = 40`,
`MODULI`, with index 0 = 255) and the constant functions: `recip`
(⌊2^r/m⌋, on 128 bits), `modulus_product`, `mod_inverse` (extended Euclid)
and `crt_weight`. Moduli are passed as packed `[S-1:0][B-1:0]` arrays.
Another residue system is a parameter override of `S`, `B`, `N` and
`MODULI`, where N must be at least ⌈log2 M⌉. The moduli must be pairwise
coprime, at least 2, and fit in B bits. M must stay below 2^126 and each
modulus below 2^62, because the package does its constant arithmetic on
128-bit and 64-bit values. `mod_reduce` rejects
`WX < WM + 1` at elaboration.

## Files

| file | contents |
|---|---|
| `rtl/rns_pkg.sv` | default moduli, constant functions |
| `rtl/int_mul.sv` | WA×WB binary multiplier |
| `rtl/split_mul.sv` | 2H×2H multiplier from four H×H ones and two adders |
| `rtl/mod_reduce.sv` | reciprocal-based reduction (MUL, MUL, two subtractors, mux) |
| `rtl/modmul.sv` | modulo-m multiplier with modulus/reciprocal registers |
| `rtl/rns_mul.sv` | S modulo-m_i multipliers |
| `rtl/residue_digit.sv` | one binary-to-residue digit, constant ROMs |
| `rtl/bin2res.sv` | S digit converters |
| `rtl/adder_tree.sv` | log-depth adder tree |
| `rtl/res2bin.sv` | CRT reverse converter |
| `rtl/rns_int_multiplier.sv` | top level: converters + multiplier + converter |
| `tb/tb_<block>.sv` | self-checking testbench per block |
| `tb/tb_rns_example_7_11_13.sv` | whole chain on the moduli {7, 11, 13} |
| `tb/tb_rns_mul_16bit.sv` | 16-bit moduli with split multipliers |
| `tb/tb_rns_int_multiplier_16bit.sv` | whole chain on five 16-bit moduli (N = 80) |

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops, and a watchdog ends it with a
failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl rtl/rns_pkg.sv \
          tb/tb_rns_int_multiplier.sv --top-module tb_rns_int_multiplier
./obj_dir/Vtb_rns_int_multiplier
```

To run another testbench, substitute its name. `rns_pkg.sv` must be read
first, and `-y rtl` finds the rest. `-Wno-fatal` keeps the testbenches'
width warnings from stopping the build; they come from mixing 32- and
64-bit integers in the reference models.

What the tests establish:

* Reference values come from the testbench's own `%` and `*` on 64-bit
  integers. They do not come from the RTL's algorithm.
* `tb_modmul` covers:
  * every digit pair modulo 255;
  * six reloaded moduli, down to 2;
  * a pipelined lane, where each result must arrive exactly 3 cycles after
    its operands;
  * a 16-bit lane with a split multiplier;
  * the 7/11/13 example.
* `tb_mod_reduce` checks that the correction flag matches the exact
  quotient, and that both outcomes (estimate exact, estimate one short)
  occur.
* `tb_rns_int_multiplier` runs the top level at its default parameters for
  6000 cycles:
  * operands are mixed unsigned and signed;
  * every product is checked, and its latency must be exactly 13 cycles;
  * it counts corrections in the direct converters, the multipliers and
    the final reduction, negative signed results, and back-to-back
    operands, and fails if any of these never happened.
* `tb_rns_example_7_11_13` checks every unsigned pair with x·y < 1001 and a
  sweep of signed pairs on the small system.
* `tb_rns_int_multiplier_16bit` runs the top level with `B = 16`,
  `N = 80`, `SPLIT = 1` and the moduli {65534, 65521, 65519, 65497, 65479}
  (M ≈ 1.2·10^24). It checks unsigned and signed products against 128-bit
  reference arithmetic, with the same 13-cycle latency.

## Where this RTL departs from the original proposal, and its limits

* **Multipliers and adders are behavioural.** `int_mul` is a `*` and the
  adders are `+`/`-`, left to synthesis. The original area–time analysis
  assumes a specific area–time-optimal multiplier that takes its operands
  serially in T_M strings, and log-depth prefix adders. That string-serial
  organisation, and the delay elements it needs to keep strings aligned, are
  not reproduced: operands here are fully parallel.
* **Modulus registers are loadable.** Loading REGISTER M and REGISTER T
  through `cfg_*` is this design's choice. The structure only shows that
  the two registers exist.
* **The top level's shape is this design's choice.** The sign mapping
  logic, the `signed_mode` pin, the valid bits, the register placement for
  `PIPE` and the use of two direct converters are not specified by the
  original proposal.
* **CRT weights are computed.** The reverse converter's constants P_i are
  derived from the Chinese remainder theorem here; they are not given in
  the original.
* **No overflow detection or scaling.** Results outside [0, M) (or
  [−M/2, M/2) in signed mode) wrap silently.
* **Timing is in cycles, not nanoseconds.** The original quotes about
  150 ns per multiplication and a 70–100 ns pipeline interval for
  8-bit moduli with commercial multipliers. This RTL fixes only the cycle
  latency; the clock period depends on the target technology.
* **Limit on the system size.** The constant functions work on 128-bit
  values, so M must stay below 2^126 and each modulus below 2^62. The
  16-bit system with five moduli (M ≈ 2^80) runs end to end; much larger
  systems need wider constant arithmetic.
