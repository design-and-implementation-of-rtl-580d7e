# healthmonitor — combinational body-composition calculator

`healthmonitor` turns five everyday measurements of a person into four
standard health indices in a single block of combinational logic:

| input   | meaning                         | width |
|---------|---------------------------------|-------|
| `a`     | sex: 0 = female, 1 = male       | 1     |
| `w`     | body weight, kg                 | 8     |
| `h`     | body height, cm                 | 8     |
| `age`   | age, years                      | 8     |
| `waist` | waist circumference, cm         | 8     |

| output | index                                              | width |
|--------|----------------------------------------------------|-------|
| `bmi`  | body mass index, kg/m²                             | 8     |
| `b`    | body fat percentage before the sex correction      | 8     |
| `bfp`  | body fat percentage, %                             | 8     |
| `rfm`  | relative fat mass, %                               | 8     |
| `bmr`  | basal metabolic rate, kcal/day                     | 12    |

There is no clock, no reset and no handshake: the outputs settle one
propagation delay after the inputs change. A system around it would sample
the inputs into registers, wait one clock, and read the outputs.

## Data flow

```
 w ──┬──────────────► hm_bmi ──bmi──┬──────────────────► bmi
 h ──┼──┬───────────►               └─► hm_bfp ─┬─────► b
age ─┼──┼──┬────────────────────────────►       └─────► bfp
 a ──┼──┼──┼──┬─────────────────────────►
     │  │  │  ├──► hm_rfm ◄── waist ──────────────────► rfm
     │  └──┼──┼──►  (h)
     └─────┴──┴──► hm_bmr (w, h, age, a) ─────────────► bmr
```

Each index has a unit of its own. Only BFP depends on another unit: it is
computed from the integer BMI, so it carries BMI's rounding.

## The four formulas and how they are evaluated in integers

Every unit keeps its arithmetic exact and rounds only once, at the end.
Results are always rounded down. A result below 0 is clamped to 0, and a
result above the output's range is clamped to its maximum. These rules
decide the low bits of every output, so they are given in full here.

**BMI** (`hm_bmi`). BMI is weight over the square of height. Height arrives
in centimetres, so the unit computes

    bmi = floor(10000 * w / h²)

with a divider of 22 bits by 16 bits. A height of 0, and any quotient above
255, gives 255. Example: 70 kg and 175 cm give 22.86, so `bmi` = 22.

**BFP** (`hm_bfp`). The Deurenberg estimate is

    BFP = 1.20·BMI + 0.23·Age − 10.8·S − 5.4,   S = 1 for a male, 0 for a female

The unit works in hundredths of a percent. It forms
`b×100 = 120·bmi + 23·age − 540`. It then subtracts 1080 for a male, and
divides by 100. Both the uncorrected value `b` and the final `bfp` are
outputs.

**RFM** (`hm_rfm`). Relative fat mass is

    RFM = C − 20 · height / waist,   C = 64 (male), 76 (female)

To keep the fraction of height/waist, the unit divides
`C·waist − 20·h` by `waist`. This gives exactly the formula, rounded down.
A zero waist gives 0. Example: a man 175 cm tall with a 90 cm waist gets
64 − 38.9 = 25.1, so `rfm` = 25.

**BMR** (`hm_bmr`). This is the Mifflin–St Jeor equation with the
6.25·height term taken as 6·height:

    BMR = 10·w + 6·h − 5·age + 5     (male)
    BMR = 10·w + 6·h − 5·age − 161   (female)

The largest value over all 8-bit inputs is 4085. The output is therefore
12 bits, and it never clamps from above.

## Points where this RTL makes its own reading

The monitor's original description gives its formulas twice, once as
prose and once as a flowchart of the code, and the two differ in places.
Where they differ, this RTL follows the prose and the standard medical
formula:

* **BMI.** The flowchart divides weight by height. That is zero in integers
  for any adult measured in cm. This RTL divides by the square of height,
  which is the definition of BMI.
* **BFP.** The flowchart first forms an uncorrected value `b`, then
  subtracts 11 when the sex bit is 0. Its constants differ from the
  formula's. The formula subtracts 10.8 for a male, and the sex bit is 0 for
  a female. This RTL keeps the two-step structure and the `b` output. It
  uses the formula's constants and polarity: the correction applies when
  `a` = 1.
* **RFM.** The flowchart groups the constant as (C − 20)·(h/waist). This RTL
  uses C − 20·(h/waist), as the formula gives.
* **BMR.** The integer coefficients 10, 6, 5, 5 and 161 are taken as
  given.
* **Not built.** The description also lists a bone mineral density output,
  read from weight off a chart. That chart is not available, so there is no
  `bmd` output.
* **Own choices.** All of the following are this design's own choices, not
  part of the description: the widths of `bmi`, `b`, `bfp` (8 bits) and
  `bmr` (12 bits), rounding down, clamping, and treating the waist as
  centimetres.

## Files

| file                    | contents                                            |
|-------------------------|-----------------------------------------------------|
| `rtl/hm_pkg.sv`         | sex enum and every formula constant                 |
| `rtl/hm_bmi.sv`         | BMI unit                                            |
| `rtl/hm_bfp.sv`         | BFP unit (outputs `b` and `bfp`)                    |
| `rtl/hm_rfm.sv`         | RFM unit                                            |
| `rtl/hm_bmr.sv`         | BMR unit                                            |
| `rtl/healthmonitor.sv`  | top, wiring the four units together                 |
| `tb/tb_hm_*.sv`         | one self-checking testbench per unit                |
| `tb/tb_healthmonitor.sv`| end-to-end testbench of the top at default sizes    |

To change a coefficient, edit `hm_pkg`. Every unit has a width parameter
`W` (default 8). The top also has `BMR_W` (default 12). The internal
accumulators are sized from these parameters.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Run them
with Verilator 5:

```
verilator --binary --timing --assert rtl/hm_pkg.sv rtl/hm_bmi.sv rtl/hm_bfp.sv \
    rtl/hm_rfm.sv rtl/hm_bmr.sv rtl/healthmonitor.sv tb/tb_healthmonitor.sv \
    --top-module tb_healthmonitor
./obj_dir/Vtb_healthmonitor
```

For one unit, list `rtl/hm_pkg.sv`, that unit's file and its testbench.

Each unit is compared against a reference model written in a different
form. For BMI and RFM the reference searches for the largest integer
result; for BFP it works in tenths and hundredths.

* The BMI unit is checked over all 65 536 input pairs.
* The BFP unit is checked over all 131 072 (BMI, age, sex) combinations.
* The RFM unit is checked over all 131 072 (height, waist, sex)
  combinations.
* The BMR unit is checked on its corners plus 200 000 random vectors.

The top-level test starts with two worked examples. It then runs 100 000
realistic people and 100 000 vectors over the full input range. It also
checks that each branch occurs: male and female, BMI clamped at 255, and
BFP, RFM and BMR clamped at 0. The top also holds two assertions: `bfp`
never exceeds `b`, and `rfm` never exceeds 76.

## Limits

* The indices are integer-valued. A BMI of 24.9 reads as 24. Add fraction
  bits to the outputs if finer steps are needed.
* BFP uses the rounded BMI. It can therefore be up to about 1.2 points
  below a BFP computed from the exact BMI.
* The dividers are combinational, with a 22-by-16-bit divider on the BMI
  path. At high clock rates, register the inputs and outputs and allow
  enough time for the divider, or pipeline it.
