# Pipelined two-input fuzzy logic controller

This is a hardware fuzzy controller of the kind used in closed-loop control. Its two inputs
are the error `e` and the change of error `ce` of a plant. The result is a crisp control value
in [-1, 1]. Fuzzification, inference and defuzzification are each built as a separate block
of comparators, multipliers, min/max selectors and one divider. There is no processor and no
lookup table. Every stage ends in a register, so the controller gives a result every clock
cycle, eight cycles after its inputs are sampled. At the 160 MHz reported for the original
FPGA implementation, that is 50 ns per decision.

The RTL follows a published FPGA architecture: the block structure, the fuzzy sets, the rule
table, the combining tree and the defuzzifier datapath. Where that description is
incomplete or inconsistent, this design makes its own choices. They are listed in
[Departures and choices](#departures-and-choices).

## Number format

All crisp values are 8-bit unsigned codes. `8'h00` stands for -1, `8'hFF` for +1, and a code
`c` means `2*c/255 - 1`. Membership degrees use the same 8 bits, where `8'hFF` is full
membership.

The result comes out as sign and magnitude:

* `fuzzy_out` is 20 bits wide and holds a magnitude `m`. The real value is `m/255`, and in
  practice `m <= 8'hAA`.
* `sig` is 1 for a negative result.

Examples:

* `sig=0, fuzzy_out=20'h000AA` means +0.667.
* `sig=1, fuzzy_out=20'h00017` means -0.090.

## Fuzzification (`fuzzifier`, `membership_element`)

Each input is compared with five overlapping triangular sets: NB, NS, ZE, PS and PB, indexed 0
to 4. NB and PB are shoulders and stay at full membership towards the ends of the range.

| set | a1 | a2 (peak) | a3 | rising slope | falling slope |
|-----|----|-----------|----|--------------|---------------|
| NB  | -  | 2A (flat from 00) | 55 | - | 6 |
| NS  | 2A | 55 | 7F | 6 | 5 |
| ZE  | 55 | 7F | AA | 5 | 6 |
| PS  | 7F | AA | DA | 6 | 5 |
| PB  | AA | DA (flat to FF) | - | 5 | - |

A `membership_element` computes one set:

* `fn` is `a1 < x < a3`, meaning the input lies in this set.
* On the rising edge (`x <= a2`) the degree is `(x - a1) * slope_up`.
* On the falling edge it is `(a3 - x) * slope_dn`.
* The degree saturates at `FF` and is forced to `00` when `fn` is low.

Mathematically the degree is `(x-a1)/(a2-a1)` scaled to 0..FF. The hardware replaces that
division with a multiplication by an integer slope, one slope per edge of the picture above.
Those slopes are not a simple function of the edge widths. They are the values that reproduce
the published reference results (see below).

Example: for `x = 8'h50`, NB is `(55-50)*6 = 1E` and NS is `(50-2A)*6 = E4`. All other sets
are 0, with `fn = 5'b00011`.

`fuzzifier` places five elements side by side and registers `fn[4:0]` and `msf[0..4]`. The
controller contains two fuzzifiers, one for each input.

## Inference (`rule_base` = `firing_stage` + `combining_stage`)

The rule table maps (set of e, set of ce) to an output set:

| e \ ce | NB | NS | ZE | PS | PB |
|--------|----|----|----|----|----|
| NB | NB | NB | NB | NS | ZE |
| NS | NB | NS | NS | ZE | PS |
| ZE | NB | NS | ZE | PS | PB |
| PS | NS | ZE | PS | PS | PB |
| PB | ZE | PS | PB | PB | PB |

**Firing.** All 25 rules are evaluated in parallel. Rule (a, b) fires when `fn1[a] & fn2[b]`,
and its strength is `min(msf1[a], msf2[b])` (fuzzy AND). Each output set appears exactly five
times in the table. The firing stage therefore groups its 25 outputs as `m[k][i]`, where `k`
is the output set and `i` counts that set's rules in row-major order. For example,
`m[NB][0]` is rule (NB,NB), `m[NB][1]` is (NB,NS) and `m[PB][4]` is (PB,PB). The function
`fuzzy_pkg::rule_of` computes this placement at elaboration time from the table.

**Combining.** The five strengths of an output set are merged with max (fuzzy OR) by four
registered two-input `combining_element`s, arranged in three levels:

```
level 1:  v0 = max(m0, m1)      v1 = max(m2, m3)      m4 -> delay
level 2:  v2 = max(v0, m4')     v1 -> delay
level 3:  v3 = max(v1', v2)  =  msf3[k]
```

With five output sets that makes 20 elements (10 + 5 + 5). The two delay registers (`m4'`,
`v1'`) are not in the original element list. They keep both operands of an element from the
same input sample, so the tree can accept a new sample every cycle.

## Defuzzification (`defuzzifier`)

The crisp output is a weighted average of singleton outputs. The singletons sit at
-2/3, -1/3, 0, +1/3 and +2/3 for NB..PB, so their magnitudes are `AA, 55, 00, 55, AA`.
Rather than handle signed products, the datapath keeps two unsigned partial sums:

```
Sm1 = fo[NB]*AA + fo[NS]*55
Sm2 = fo[ZE]*00 + fo[PS]*55 + fo[PB]*AA
Sum = fo[NB] + fo[NS] + fo[ZE] + fo[PS] + fo[PB]

product = |Sm1 - Sm2|        (comparator + two subtractors + mux)
sig     = Sm2 > Sm1
out     = product / Sum      (truncating; 0 if Sum = 0)
```

The sign convention is 1 when the PS/PB side wins. This matches the published results: the
input pair (E3, E0), both positive big, gives `sig=1, AA`, and (20, 59) gives `sig=0, AA`.
Treat `sig` as the polarity bit of the actuator command in that convention. If you need the
opposite convention, invert it at the output.

There are three register stages:

1. The partial sums.
2. The product, the sum and the sign.
3. The quotient.

An assertion in the defuzzifier checks that a valid result never exceeds the largest weight.
The divider is a single-cycle 20-bit by 11-bit combinational divider. It sets the critical
path, and a multi-cycle or pipelined divider could replace it without changing the
interface.

## Pipeline and interface (`fuzzy_top`)

```
input1 ->[fuzzifier]--fn1,msf1--+
                                 +->[firing]->[comb L1]->[comb L2]->[comb L3]->[Sm]->[|diff|,sign]->[div]-> sig, fuzzy_out
input2 ->[fuzzifier]--fn2,msf2--+
 edge:        1                        2          3          4          5       6          7           8
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clock` | in | 1 | all registers on its rising edge |
| `reset` | in | 1 | synchronous, active high, clears every register |
| `valid_in` | in | 1 | `input1`/`input2` valid this cycle |
| `input1` | in | 8 | error e, code 00..FF for -1..+1 |
| `input2` | in | 8 | change of error ce |
| `sig` | out | 1 | sign of the result, 1 = negative |
| `fuzzy_out` | out | `OUT_W` (20) | magnitude of the result, value/255 |
| `valid_out` | out | 1 | `sig`/`fuzzy_out` hold the result of the pair taken 8 edges earlier |

Timing: a pair is sampled on rising edge 1, and its result is on the outputs after edge 8,
with `valid_out` high. A new pair may be applied on every edge. `valid_in` only travels along
with the data; the data registers load on every cycle. So when `valid_in` is low, `valid_out`
is low 8 cycles later, but the outputs still change.

Parameters: `OUT_W` (default 20) and `WEIGHT` (output singleton magnitudes, default
`AA,55,00,55,AA`). The set corners, the slopes and the rule table are constants in
`fuzzy_pkg`.

## Departures and choices

Each of these is noted again in the header of the module concerned.

* **Outer output weights.** The original block drawing of the defuzzifier labels the NB/PB
  multipliers `2AH`. The published input/output reference pairs, however, only come out with
  `AAH`: (20,59)→+AA, (A0,70)→-17, (40,85)→+6F and (E3,E0)→-AA. `AAH` also puts the
  singletons at ±2/3, which is monotonic. The default is therefore `AAH`.
  `WEIGHT = '{8'h2A, 8'h55, 8'h00, 8'h55, 8'h2A}` restores the drawing. With it, the pair
  (70, F0) gives sum `D2`, product `2F0D` and result `39`, which agrees with a published
  simulation trace.
* **Slopes instead of division**, with the per-edge constants 6/5/6/5. They are inferred from
  the published membership degrees and results; no formula is given for them.
* **`fn` flag** = strictly inside (a1, a3), taken from the element's gate structure. A
  procedural description of the same element sets the flag for any `x >= a1`. That version
  would let sets that lie entirely below the input fire rules with a stale degree.
* **Peak and saturation.** At `x == a2` the rising-edge value is used. Values above `FF` are
  clamped; for example, NS at `x = 55` would otherwise be `43*6 = 258`.
* **Registers.** Two delay registers align the combining tree. There is one register after the
  partial sums and one after the divider. These bring the total to the 8 cycles quoted for the
  original design, whose drawings place flip-flops only in the combining elements, at the
  product and sum, and at the sign.
* **Reset** is synchronous (its polarity, active high, is the original's). `valid_out` is an
  addition. A sum of zero yields 0, which cannot happen for in-range inputs.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
`tb/fuzzy_ref_pkg.sv` is written separately in plain integer arithmetic. It keeps its own
copy of the corners, slopes, rule table and weights.

| testbench | what it covers |
|-----------|----------------|
| `tb_membership_element` | all 256 codes for NB (shoulder), NS and PB (shoulder); hand-computed points |
| `tb_fuzzifier` | all 256 codes streamed; degrees for 50, 40, 70, B0, F0; reset; valid |
| `tb_firing_stage` | 1000 random flag/degree sets against the rule table; rule placement |
| `tb_combining_element` | random max with equal operands |
| `tb_combining_stage` | back-to-back random rule sets, maximum at every position, 3-cycle latency |
| `tb_rule_base` | random streaming plus the pair 70/F0 (PS = 4B, PB = 87) |
| `tb_defuzzifier` | random vectors; hand-worked vectors; the 2AH weight variant |
| `tb_fuzzy_top` | the four published reference pairs with an exact 8-cycle latency check; then all 65,536 input pairs streamed with bubbles; counts of both signs, zero results, shoulders, saturated edges, multi-rule outputs, back-to-back inputs and bubbles |

`tb_fuzzy_top` runs the controller at its default parameters and takes well under a second.
To run it with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fuzzy_pkg.sv tb/fuzzy_ref_pkg.sv tb/tb_fuzzy_top.sv --top-module tb_fuzzy_top
./obj_dir/Vtb_fuzzy_top
```

For another block, replace `tb_fuzzy_top` with its testbench. Verilator finds the modules
through `-Irtl`. Lint with `verilator --lint-only -Wall -Irtl rtl/fuzzy_pkg.sv rtl/fuzzy_top.sv`.
The only warnings are package constants that a given module does not use.

## What is not here

The FPGA itself is not part of this RTL: the logic blocks, the routing and the resource and
speed figures of the original implementation. The 160 MHz clock is a property of that mapping,
and nothing here checks it.
