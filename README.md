# Fuzzy spring-rate controller for cornering

A car that corners hard, heavily loaded or fast needs its suspension
stiffened at one axle and softened at the other to keep the tyres gripping
the road. This design decides the front and rear spring rates with fuzzy
logic, not with a plant model. Three sensor readings (steering angle,
passenger load and vehicle speed) are graded against overlapping linguistic
sets such as *smooth*, *rather sharp* and *heavy*. Twenty if-then rules map
those grades to spring-rate sets from *very soft* to *very stiff*. The
result is turned back into two percentages by taking the centre of gravity
of the combined output sets.

It is a Mamdani controller in synthesizable SystemVerilog, built for an FPGA
and using integer arithmetic only. The membership-degree unit at its heart
is a subtractor, a multiplier and a clocked comparator feeding a mux. It
comes from the original project. The source defined the inference and
defuzzification stages only by their settings (min/max operators, centroid),
so their hardware here is this design's own.

## Signal chain

```
 corner_angle ─┐   ┌─────────┐   ┌──────────────┐   ┌───────────┐   ┌──────────────┐   ┌─────────┐
 load_kg ──────┼──►│  input  ├──►│ fuzzification├──►│ inference ├──►│defuzzification├──►│ output  ├──► front_rate
 speed_kmh ────┘   │ scaling │   │  12 MF units │   │ 20 rules  │   │ centroid x 2 │   │ scaling ├──► rear_rate
                   └─────────┘   └──────────────┘   └─────▲─────┘   └──────────────┘   └─────────┘
                                                          │
                                                  knowledge base (flc_pkg):
                                                  rule table + MF memory
```

| Stage | Module | What it does | Clocks |
|---|---|---|---|
| input scaling | `input_scaling` (x3) | deg / kg / km/h → 0..240 | 0 (register after it: 1) |
| fuzzification | `fuzzifier` → 12 × `fuzzification` | degree of every input set | 1 |
| inference | `inference` | rule strengths, clip level of each output set | 1 |
| defuzzification | `defuzzifier` (x2) → 5 × `fuzzification`, `fuzzy_div` | centroid of the clipped output sets | 269 |
| output scaling | `output_scaling` (x2) | 0..240 → 0..1000 (0.1 % units) | 0 (register after it: 1) |

`traction_controller` is the top.

## Number formats

Every variable lives on a normalised universe 0..1, coded as **0..240**. All
membership-function breakpoints sit at sixths of the range (0.167, 0.333,
0.5, ...), and 240 makes each of them a whole number: 40, 80, 120, 160, 200.
A membership degree 0..1 is coded as **0..200**. Every sloped edge of every
set spans 40 units, so its slope is exactly 200 / 40 = **5**. That is also
the slope constant the original fuzzification test used. The fuzzification
datapath is 9-bit signed (−256..255, the original integer range). Its
difference is 10 bits and its product 19 bits, so nothing can overflow.

Physical full scales (from the original MF tables): steering angle 360°,
passenger load 350 kg, speed 180 km/h, spring rate 100 %.

## Membership functions

| Variable | Set | Shape on 0..240 |
|---|---|---|
| corner, speed | very smooth / very slow | 200 up to 40, falling to 0 at 80 |
| | smooth / slow | triangle 40–80–120 |
| | rather sharp / rather fast | triangle 80–120–160 |
| | sharp / fast | triangle 120–160–200 |
| | very sharp / very fast | rising from 160, 200 from 200 on |
| load | not heavy | 200 up to 40, falling to 0 at 80 |
| | heavy | triangle 40–80–120 |
| front, rear rate | very soft … very stiff | triangles centred on 40, 80, 120, 160, 200 |

Note that load above 120 (175 kg) belongs to *neither* load set. This is how
the original sets are drawn, and it is kept.

## The fuzzification unit (`fuzzification`)

This is the one block with a worked-out internal structure, and it is reused
on both sides of the controller:

```
 a ──────┬──► fuzzy_sub (a − centre) ──► fuzzy_mult (× slope) ──► reg ──┐
 centre ─┤                                                               ├─► mux ─► degree
         └──► fuzzy_cmp (a ? centre), clocked ──► x1 x2 x3 ─────────────┘
```

The comparator is clocked, so the product is registered beside its flags and
the degree appears one clock after `a`. The mux chooses:

* `x2` (on the centre): 200
* `x1` (right of the centre): 200 − slope·(a − centre), or 200 if the set is a right shoulder
* `x3` (left of the centre): 200 + slope·(a − centre), or 200 if the set is a left shoulder

The result is clamped at 0. Centre, slope and shape are ports. The
`fuzzifier` feeds them from the constant MF tables of `flc_pkg` (the "MF
memory"). The `defuzzifier` uses five more units to evaluate the output sets
at each sample point.

## Rules, and the choice of connective

The twenty rules (rule *n* drives bit *n*−1 of `active_rules`):

| Corner | Load | Speed | Front | Rear |
|---|---|---|---|---|
| very smooth | not heavy | very fast | very stiff | very soft |
| very smooth | heavy | rather fast / fast / very fast | very stiff | very soft |
| smooth | not heavy | very fast | stiff | soft |
| smooth | heavy | rather fast / fast / very fast | stiff | soft |
| rather sharp | not heavy | very fast | ordinary | ordinary |
| rather sharp | heavy | rather fast / fast / very fast | ordinary | ordinary |
| sharp | not heavy | very fast | soft | stiff |
| sharp | heavy | rather fast / fast / very fast | soft | stiff |
| very sharp | not heavy | very fast | very soft | very stiff |
| very sharp | heavy | rather fast / fast / very fast | very soft | very stiff |

(Rows with three speeds are three rules each; the order is rather fast, fast,
very fast.)

The original controller joins the three antecedents of each rule with
**OR**, so a rule's strength is the *maximum* of its three degrees. This is
the default, `CONNECTIVE = CONN_OR`. Read literally, it makes a weak
controller. Almost every input satisfies *some* antecedent of rules that
pull in opposite directions, so the front and rear sets fire nearly
symmetrically and both rates settle at or near **50 %**. The original
controller printed exactly this result for all three operating points it
reports: both outputs sat at the middle of their range. Its accompanying
commentary reads those cases as "front stiff, rear soft" and the reverse.
The printed numbers do not bear that out, and this design reproduces the
numbers. For a controller that actually
discriminates, build with `CONNECTIVE = CONN_AND` (strength = *minimum*,
the usual reading of such a rule table). Under AND, no rule fires when the
speed is 60 km/h or less (where "rather fast" begins) or the load is above
175 kg. The controller
then outputs 50 % and raises `no_rule`.

Implication is min (each output set is clipped at its rule's strength).
Aggregation is max (each output set keeps the largest clip level among the
rules naming it). Both follow the original settings.

## Centroid defuzzification (`defuzzifier`)

The output set is μ(y) = max over k of min(clip_k, MF_k(y)). Its centre of
gravity y* = Σ y·μ(y) / Σ μ(y) is found by sweeping y over 0..240, one sample
per clock (`STEP = 1`, so 241 samples):

1. **Sweep.** The five output MF units evaluate the sample. Their degrees
   are clipped and combined, and Σ y·μ (24 bits) and Σ μ (16 bits) are
   accumulated one clock behind the sample counter.
2. **Divide.** `fuzzy_div`, a restoring divider producing one quotient bit
   per clock, computes (Σ y·μ + Σ μ / 2) / Σ μ, rounded to the nearest
   integer.
3. **No rule.** If Σ μ = 0 the divide is skipped; y* = 120 (the middle) and
   `no_rule` is set.

Latency from `start` to `done`: 241 + 24 + 4 = **269** clocks, or 244 when
nothing fires. A coarser `STEP` shortens the sweep to 240/STEP + 1 samples.
Front and rear have one defuzzifier each; they run in lock step.

## Top-level interface (`traction_controller`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | sample the three inputs and start (ignored while `busy`) |
| `corner_angle` | in | `IN_W`=10 | steering angle, degrees (saturates at 360) |
| `load_kg` | in | 10 | passenger weight, kg (saturates at 350) |
| `speed_kmh` | in | 10 | speed, km/h (saturates at 180) |
| `busy` | out | 1 | an operation is in progress |
| `done` | out | 1 | one-clock pulse: results valid (they hold until the next `done`) |
| `front_rate`, `rear_rate` | out | 10 | spring rate in 0.1 % units, 0..1000 |
| `no_rule` | out | 1 | no rule fired; both rates are 50.0 % |
| `active_rules` | out | 20 | rules with non-zero strength for this request |

Latency: **273** clocks from `start` to `done` (248 when no rule fires). One
operation at a time. Parameters: `CONNECTIVE`, `DEFUZZ_STEP`, `IN_W`, and
the three physical full scales `CORNER_RANGE`, `LOAD_RANGE`, `SPEED_RANGE`.
The sensors and the damper actuators lie outside this design. They connect
through the input ports and the two rate ports.

## What follows the source and what does not

Taken from the original design:
* the stage chain
* the three inputs and two outputs with their sets and physical ranges
* the rule table and the OR connective
* min/max/centroid
* the subtract–multiply–compare–mux structure of the fuzzification unit, with a clocked comparator
* slope 5 and integer arithmetic

This design's own choices:
* the 0..240 / 0..200 number formats
* the mux function (clamp and shoulder handling)
* the parallel layout (one MF unit per set, all rules at once)
* the sampled-sweep centroid and its divider
* the start/busy/done handshake and reset
* rounding and saturation in the scalers
* the 0.1 % output unit
* the 50 % no-rule value

Known departures:
* **Comparator reference.** In the original stand-alone fuzzification test
  the comparator compared the input with 0. Here it compares with the set's
  centre, as the block diagram shows. The mux needs to know on which side of
  the centre the input lies.
* **Slope.** The original prose mentions a slope of 15, but its code and its
  simulated waveform use 5. This design uses 5.
* **Input range of that test.** It drove inputs up to 550, beyond the
  −256..255 range of its own ports. The default unit is 9 bits wide; the
  testbench replays that run at `W = 11`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come
from `tb_flc_ref_pkg`, a separate reference model. It describes each
membership function by its corner points and interpolates, instead of
using slopes and centres, and it restates the rule table on its own.

* `tb_fuzzy_sub`, `tb_fuzzy_mult`, `tb_fuzzy_cmp`, `tb_fuzzification`:
  replay the original sub-block waveforms value for value, then random
  operands.
* `tb_fuzzifier`, `tb_inference` (both connectives), `tb_defuzzifier`:
  exhaustive or random coverage against the reference, including latency,
  the no-rule case and a start while busy.
* `tb_flc_pkg`: the rule table as text, and every MF at every point.
* `tb_traction_controller`: about 430 end-to-end requests on an OR and an
  AND controller side by side. It counts and requires saturated inputs,
  shoulder regions, no-rule requests, starts while busy, and each of the 20
  rules firing.
* `tb_traction_full`: the default build only. It runs the original three
  operating points (both rates 50.0 %, as originally reported) and a
  steering sweep.

Run any of them with plain Verilator, e.g.:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/flc_pkg.sv tb/tb_flc_ref_pkg.sv tb/tb_traction_full.sv \
    --top-module tb_traction_full
./obj_dir/Vtb_traction_full
```

After synthesis the whole controller comes to about 1,000 word-level cells
and 920 flip-flops. Most of the flip-flops are the pipeline registers of the
22 membership-degree units.

## Changing it

* **New rules or sets:** edit the tables in `rtl/flc_pkg.sv`. `N_RULES`,
  `N_CORNER` and the other counts size the hardware.
* **Other sensors:** change the `*_RANGE` parameters of the top.
* **Faster response:** set `DEFUZZ_STEP` to 2, 4 or 8, which trades centroid
  resolution for latency.
