# Self-exercising k-order comparators with built-in current sensing

A *k-order comparator* takes two n-bit words and answers one question: do they
differ in fewer than k bit positions? The classic use is the last step of
decoding a k-error-correcting code. A (k+1)-order comparator between the
received word and its corrected version tells "correctable" from "only
detectable". The same circuit lets a cache compare ECC-protected tags, or a
network host compare an ECC-encoded destination address with its own, with no
decoder in front.

The earlier comparator this design builds on is a ratioed (pseudo-nMOS) gate.
It draws static current whenever the operands differ at all, and in a
set-associative cache or on a broadcast network most comparisons are
mismatches. This design replaces it with two dynamic (precharge/evaluate)
versions:

* **design A** draws static current only when the distance is 1 to k-1, a
  case that is rare in these applications;
* **design B** draws it only for a short pulse after the rising clock edge.

Each comparator is wrapped in a **self-exercising checker**. In a test phase a
small on-chip generator drives it with vectors whose distance alternates
between k and k-1. A toggle flip-flop supplies the expected answer, so the
output pair (Z0, Z1) must be a two-rail code word, (0,1) or (1,0), after every
evaluation. A **built-in current sensor** (BICS) on the comparator's supply
adds a second pair (Y0, Y1). Some faults leave the logic answer right but
change the current. In design A the sensor is also *expected* to fire: high
current at distance k-1 is the fault-free behaviour.

The comparators are transistor circuits. Here they are behavioural
(switch-level) SystemVerilog models, with a supply-current output for the
current sensor to read. The generator, the expected-value flip-flop, the input
switches and the two-rail encoders are synthesizable RTL.

## The comparator stage (both designs)

`kcmp_dynamic_core` models the part the two designs share:

```
 Vdd --t1(pMOS, gate lp)-- com --+-- q_1 --+
                                 +-- q_2 --+-- lcom --t7-- Gnd
                                 +-- q_n --+
 com --[t2/t3 inv]--> feed --[t4/t5 inv]--> OUT
 feed --> lp (gate of t1);  t6 (gate cp_n) pulls lp to ground
```

Each q_i is driven by X_i = A_i xor B_i (`operand_xor`), so the number of
conducting q_i is the Hamming distance w. The q_i are sized against t1 so that
k or more of them pull com below the inverter threshold and fewer than k do
not. The model expresses that sizing as a threshold on the count. Once t7
conducts:

| distance w | what happens | current |
|---|---|---|
| 0 | no path, com stays high, OUT = 1 | leakage (10 uA) |
| 1 .. k-1 | t1 wins, com stays high, OUT = 1 | **t1-q-t7 path (3 mA)** while t1 and t7 are both on |
| >= k | com falls, feed rises and turns t1 off, OUT = 0 | leakage once t1 is off |

`com` is a dynamic node. When nothing drives it, it keeps its charge, so the
model holds it in a latch. Both inverters have a 1 ns delay, which orders the
com -> feed -> t1 feedback loop. Lint and synthesis tools report a loop and a
latch here. Both are the circuit's own feedback and charge storage.

### Design A (`kcomparator_a`)

The clock drives t7 directly. It also drives the t8/t9 inverter, whose output
cp_n gates t6.

* **Precharge (clk low).** t7 is off. t6 holds t1 on, com charges and OUT = 1.
* **Evaluation (clk high).** t7 turns on and t6 turns off, so feed now controls
  t1. At the end of evaluation, OUT = 1 iff w < k.

Static current flows for the whole evaluation phase when 1 <= w < k, and never
otherwise. Operands should change only at the start of precharge.

### Design B (`kcomparator_b`)

t7 is driven by `res = nand2(OUT, trig)`. `trig = nand1(clk, cp_n)`, where
cp_n is the clock delayed and inverted by T_EVENT_NS. This makes trig a low
pulse of width T_EVENT_NS right after each rising clock edge:

```
clk   ____|~~~~~~~~~~~~~~~~~~~~
trig  ~~~~|__|~~~~~~~~~~~~~~~~~   (pulse = T_EVENT_NS)
res         high in the pulse, then = not OUT
```

During the pulse, t6 is still on and t7 is on, so the stage evaluates with t1
forced on. Afterwards t7 stays on only if OUT fell, and by then t1 is already
off. The design-A current is therefore limited to the pulse, and OUT carries
the same answer. The pulse must outlast the stage's settling time (3 gate
delays in the model) and be much shorter than half a clock period. Otherwise
the saving over design A disappears.

Consequence of the connections as drawn: a low OUT keeps t7 on into the next
precharge. If the next operand pair again differs in k or more bits, com
cannot recharge, and current flows through t1 for that precharge. The model
reproduces this, and the top-level testbench counts it. It never happens in
the test phase, where distances k and k-1 alternate.

## Self-exercising test

```
 primary pa,pb ---[TEST-bar]--+
                              +--> comparator --OUT--> Z1
 generator A,B ----[TEST]-----+        |
                                   BICS (supply current > 1 mA)
 CNSI (toggle FF) --S--+               |
                       +--> Z0 = TEST & ~S
                       +--> Y encoder (TEST, CLK, BICS, S) --> Y0, Y1
```

**Generator (`test_vector_generator`).** Two n-bit twisted-ring (Johnson)
registers, A and B. Each feeds its last cell back to its first through an
inverter. A starts as k ones then zeros, with cell 1 (bit 0) first. B starts
at zero. Both registers have period 2n. A register that has taken m steps
holds J(m): m ones from cell 1 for m <= n, and after that m-n zeros followed
by ones. The XOR of two Johnson states m steps apart has weight m (for
m <= n). The registers shift on alternate vectors, B first, so A stays k or
k-1 steps ahead. The distances are therefore k, k-1, k, k-1, ..., and the
full test set is 4n vectors. Each register is clocked at half the vector rate.

**CNSI (`cnsi`).** A toggle flip-flop stepping once per vector. S = 0 while a
distance-k vector is applied (fault-free OUT = 0) and 1 for distance k-1
(OUT = 1).

**Timing.** The generator and CNSI step on the falling clock edge, so each
vector is applied at the start of precharge and held through evaluation.
After an asynchronous reset the first vector has distance k. (Z0, Z1) is
valid at the end of evaluation. (Y0, Y1) is judged at the end of each phase.

**Logic pair.** Z0 = TEST & ~S and Z1 = OUT. Fault-free, this gives (1,0) at
distance k and (0,1) at distance k-1. A stuck-high output shows as (1,1), and
a stuck-low one as (0,0). In normal operation Z0 = 0 and Z1 is the comparison
result.

**Current pair, design A (`y_encoder_a`).** The fault-free sensor output is
known in the test phase. It is high only in the evaluation of a distance-(k-1)
vector (S = 1). The encoder makes (Y0, Y1) a code word exactly when the sensor
agrees:

| phase | mode | Y0 | Y1 | fault-free | sensor wrong |
|---|---|---|---|---|---|
| precharge | any | 0 | not BICS | (0,1) | (0,0) |
| evaluation | test | not S | BICS | (1,0) at k, (0,1) at k-1 | (1,1) at k, (0,0) at k-1 |
| evaluation | normal | 0 | 1 | (0,1) | not judged (distance unknown) |

**Current pair, design B (`y_encoder_b`).** Fault-free, design B never draws
current in the test phase. Y0 = TEST and Y1 = BICS | ~TEST. This gives (1,0)
in test while the sensor is quiet, and (1,1) when it fires. In normal
operation the pair is fixed at (0,1), because the precharge current described
above is legitimate there.

**Sensor (`bics`).** A behavioural threshold at 1 mA with a 2 ns response. The
levels are about 10 uA without a Vdd-to-ground path and about 3 mA with one.

## Fault experiment

`tb_fault_coverage` builds one checker per fault. Each runs one 64-vector
period at n = 16, k = 2. The fault is *logic-detected* if (Z0, Z1) is ever
non-code, and *current-detected* if (Y0, Y1) is. The faults (`kcmp_pkg::fault_e`,
selected with the `FAULT` parameter) are:

* stuck-at faults on clk, its two branches, cp_n, X_1, lp, lcom, feed and OUT,
  and
  on trig and res in design B;
* stuck-on and stuck-open faults on q_1, t1, t6 and t7.

Every one is detected, and the fault-free instances raise no alarm:

| | logic only | current only | both |
|---|---|---|---|
| design A (26 faults) | OUT stuck 0/1 | cp_n/1, clk-to-inverter/0, clk-to-t7/1, lp/0, t1-on, t6-on, t7-on, lcom/0 | the other 16 |
| design B (30 faults) | 16 (e.g. clk, q_1-open, t7-open, feed/0, lp/1, res/0) | 10 (e.g. lp/0, t1-on, t6-on, t7-on, lcom/0, trig/0, res/1) | X_1/1, q_1-on, feed/1, OUT/0 |

Faults inside the t2/t3 and t4/t5 inverters depend on transistor strengths
and are not modelled. The model treats the ratioed stage as ideal: with t1
stuck on, k conducting q_i still pull com low. Faults that only keep t1 on
(t1-on, lp/0, t6-on, cp_n/1) are therefore caught by current alone. A real
stage with little sizing margin may also give a wrong logic value for them.

## Modules

| module | kind | role |
|---|---|---|
| `kcmp_pkg` | package | `fault_e`, current levels, stuck-at helper |
| `operand_xor` | RTL | X = A xor B |
| `test_input_select` | RTL | primary operands or generator, by TEST |
| `test_vector_generator` | RTL | twin Johnson registers, 4n-vector test set |
| `cnsi` | RTL | expected-result toggle flip-flop S |
| `y_encoder_a`, `y_encoder_b` | RTL | current-sensor two-rail encoders |
| `kcmp_dynamic_core` | model | shared precharge/evaluate stage, supply current |
| `kcomparator_a`, `kcomparator_b` | model | designs A and B |
| `bics` | model | built-in current sensor |
| `se_kcomparator_a`, `se_kcomparator_b` | structural | complete self-exercising checkers |
| `se_kcomparator_top` | structural | both checkers side by side (`a_*`, `b_*` ports) |

Parameters: `N` (operand width, default 16) and `K` (order, default 2), as in
the reference configuration, a 16-bit 2-order comparator. Any 1 <= K <= N
works for the comparators and the logic pair. The current pair of design A
needs K >= 2, because at K = 1 the distance-(K-1) vectors draw no current;
`se_kcomparator_a` asserts this.
`kcomparator_b`/`se_kcomparator_b` add `T_EVENT_NS` (default 5), and the
models take `FAULT` (default `F_NONE`). `bics` has `THRESHOLD_UA` = 1000 and
`DETECT_NS` = 2.

The models use `#` delays and a 1 ns / 1 ps time unit, declared in every file.
The model files are for simulation only. The RTL blocks synthesize on their
own. A synthesis of the top keeps the threshold stages as the combinational
loop and latch described above. Those stages are the part that would be
custom transistor layout.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/kcmp_pkg.sv \
    tb/tb_se_kcomparator_top.sv --top-module tb_se_kcomparator_top -Mdir obj
./obj/Vtb_se_kcomparator_top
```

The testbenches are:

* `tb_se_kcomparator_top`: default size, end to end. It runs two full test
  periods and a normal phase on both designs. It counts each mechanism: the
  distance-k and distance-(k-1) vectors, the sensor firing in design A, the
  trig pulses, matches, near matches and mismatches, mode switches, and
  design B's precharge current.
* `tb_kcomparator_a`, `tb_kcomparator_b`: every distance 0..n. They print the
  modelled static power for 0, 1 and 2 conducting q_i: A 50 / 15000 / 50 uW,
  B 50 / 50 / 50 uW.
* `tb_fault_coverage`: the fault table above.
* `tb_se_sizes`: both checkers at (N,K) = (8,3), (5,5), (12,2) and (9,6), each
  through a full test period and all normal-mode distances (helper
  `se_size_check`).
* One unit testbench per RTL block.

## Where this RTL departs from, or fills in, the source description

* **Y encoder for design A.** Its function is derived here from two things:
  when design A is expected to draw current, and which non-code word each
  current fault must produce. A tabulated function that ignores TEST and CLK
  would flag every high sensor output, including the expected one at distance
  k-1, so that function is not used. The gate-level netlist of the original
  encoder is not reproduced.
* **Z0 gate** is taken as TEST & ~S. Only its inputs (S, TEST-bar) are known.
* **Generator alternation.** A and B shifting on alternate vectors is
  inferred. It is the clocking that yields the stated k / k-1 alternation and
  the 4n test-set size.
* **Current levels.** The model uses the stated 10 uA / 3 mA and the 1 mA
  threshold. A measured static power of about 3.2 mW for one conducting nMOS
  (about 0.64 mA at 5 V) suggests the real current at that size is lower. The
  sensor threshold would then need to follow it.
* **Design B precharge current** after repeated mismatches (see above). It
  follows from the connections as drawn, whereas the design is described as
  never drawing static current.
* **T_event, gate delays, reset, enable and the clock edge** are this
  implementation's choices.
* **Not included:** the transistor sizing rule of the threshold stage (a W/L
  inequality in the process parameters), the analog sensor circuit itself,
  and the earlier static comparator that the two designs improve on.
