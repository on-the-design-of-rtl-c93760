# Fault-tolerant ripple-carry adder from controllable-polarity transistors

A controllable-polarity transistor has two independent gates. The *polarity
gate* (PG) makes the device n-type (PG=1) or p-type (PG=0). The *control gate*
(CG) then turns it on or off as in an ordinary transistor. So the channel
conducts exactly when CG equals PG. This makes XOR and majority cheap: a
three-input XOR or MAJ gate needs only four such devices, arranged as two
transmission gates that share one output node.

This RTL models a one-bit full adder built from four of these gates at the
transistor level. It triplicates the adder and votes each output with three
more majority gates, and chains that stage into an N-bit ripple-carry adder.
The point of the design is fault tolerance. Every transistor can be given a
permanent stuck-at fault on either of its two gates, and the model shows how
that fault propagates:

* many faults are masked inside the gate itself, because a transmission gate
  has two devices in parallel;
* the rest are masked by the triplication and voting;
* a fault cannot leave its stage, so width does not reduce tolerance.

The whole design is combinational. There is no clock and no reset.

## The fault model

Each transistor takes one of four faults:

| kind   | effect                                                        |
|--------|---------------------------------------------------------------|
| CG/0, CG/1 | control gate stuck: the device is stuck open or stuck closed, depending on its polarity |
| PG/0, PG/1 | polarity gate stuck: the device is stuck p-type or stuck n-type |

A stuck PG does not lock the device in one state. A device stuck at p-type
still switches, only with the other sense. That is why many faults only
degrade a signal instead of flipping it. `cp_fet` applies the fault to the
gate terminal and then the rule `on = (CG == PG)`, `ntype = PG`.

## The four-transistor cell: where most of the behaviour lives

`cp_tg_cell` is the core of the model. The same cell, with different data
inputs, is every XOR gate, every MAJ gate and every voter.

```
           d_top                 upper gate (t1, t2): conducts when a != b
        t1 ==||== t2
              |------ y
        t3 ==||== t4
           d_bot                 lower gate (t3, t4): conducts when a == b

  transistor:   t1     t2     t3    t4
  CG          b_n     b      b     b_n
  PG          a       a_n    a     a_n
```

| gate            | d_top | d_bot | function          |
|-----------------|-------|-------|-------------------|
| sum (`cp_xor3`) | c_n   | c     | a ^ b ^ c         |
| inverted sum    | c     | c_n   | ~(a ^ b ^ c)      |
| carry (`cp_maj3`) | c   | a     | MAJ(a, b, c)      |
| inverted carry  | c_n   | a_n   | ~MAJ(a, b, c)     |

With true complements on the control inputs, exactly one transmission gate
conducts and both of its devices are on. The output is then full-swing.

A fault can leave one device of a pair off, or turn on a device of the other
pair. The output node is then resolved from pass strengths:

* an n-type device passes 0 strongly and 1 weakly;
* a p-type device passes 1 strongly and 0 weakly;
* if only one value is driven, the node takes it; if a strong driver is
  missing, the `degraded` flag is set;
* if both values are driven (contention), a strong 0 wins, else a strong 1,
  else 0; `degraded` is set;
* if nothing conducts, the node reads 0 and `floating` is set. This cannot
  happen with a single fault and consistent complements.

"Strong 0 wins" reflects the n-type device being the stronger puller. This
rule was fitted to circuit-level fault characterisations of the XOR and MAJ
gates. Those give DC output voltages for all 8 inputs under all 16 faults.
With 1 read above 0.600 V and 0 below 0.540 V, the rule reproduces the logic
value in every case. The results:

* **XOR:** 8 of the 16 faults can flip the output, and only on inputs 001,
  010, 100 and 111. The other 8 faults are always masked. For input 100 the
  model makes t3 CG/1 the failing fault and t3 CG/0 a masked one. That is the
  assignment that fits the switch rule and the symmetry of the gate.
* **MAJ:** 4 of the 16 faults can flip the output, and only on inputs 011
  and 110. On 000 and 111 the gate never fails. This is what makes it a safe
  voter.

Where the characterisation shows an output voltage off the rail but on the
correct side, `degraded` is set. For the XOR gate this match is exact. For the
MAJ gate, the flag is also set in a few cases where the characterised output
stays on the rail. So `degraded` marks a masked fault with reduced noise
margin. It is an indicator, not a voltage.

Which of each printed control pair drives CG and which drives PG is not
obvious from a gate schematic. The table above is the assignment that
reproduces the characterisation. Swapping any pair breaks it.

## One-bit adder cell (`cp_full_adder`)

Four cells (16 transistors) share the controls a, a_n, b, b_n. They produce
s, s_n, co and co_n in a single logic level, so stages chain without
inverters. Each output comes from its own gate. A fault can therefore make s
and s_n (or co and co_n) equal, and the next gate sees that, as it would in
silicon.

Result of the exhaustive single-fault test: 40 of the 64 faults never reach
an output. That is 8 per XOR gate and 12 per MAJ gate.

## Fault-tolerant stage (`ft_adder_stage`)

Three adder cells plus three MAJ voters make 60 transistors:

* **Permuted inputs.** Replica 1 gets (a, b, c) on its (A, B, Cin) ports,
  replica 2 gets (c, a, b) and replica 3 gets (b, c, a). Sum and carry are
  symmetric, so the results agree. But the same transistor fault sees
  different operand patterns in each replica, so a fault type present in two
  replicas rarely fails on the same vector.
* **Voters.** Three voters vote s, co and co_n. Each voter uses the replicas'
  complementary outputs as its inverted controls: s_n for the sum voter, co_n
  for the carry voter, co for the inverted-carry voter. Replicas 1, 2 and 3
  drive the voter's A, B and C inputs. This order is a choice of this design.
  The same-fault and replica-plus-voter counts below are the same for all
  six orders.
* **Why single faults vanish.** With at most one faulty replica, a fault-free
  voter sees 000 or 111 on every vector. Those inputs are safe for the
  majority gate even when the voter itself carries a fault. So a single fault
  anywhere in the stage never reaches s, co or co_n.

Measured by `tb_ft_adder_stage`, with every case enumerated:

| fault set | cases | wrong output |
|-----------|-------|--------------|
| single faults, replicas and voters | 240 | 0 |
| two faults in two different replicas | 12 288 | 24 (0.2 %) |
| of which: the same fault in two replicas | 192 | 2 |
| one replica fault plus one voter fault | 9 216 | 80 (0.9 %) |

Departures from the published claims:

* The design is described as turning no same-fault pair into a common-mode
  error. This model finds 2 of 192 such pairs that fail.
* The published replica-plus-voter figure is 192 failures in 6,912 pairs,
  counted over 144 replica faults. This model counts all 192 replica faults
  and finds fewer failures.
* The published figure for replica pairs, under 1 % of 4,032, holds here over
  this model's larger enumeration.

## N-bit adder (`ft_rca`) and fault injection

`ft_rca` chains N stages. Carry and inverted carry go from each stage to the
next. The complements of a, b and cin come from plain inverters at the inputs.
These inverters are outside the protected region, since an operand fault
cannot be masked unless the operand is itself triplicated.

In silicon, the transmission-gate chain needs a restoring buffer after every
fourth stage. That is electrical only and has no logic counterpart here.

| parameter | default | meaning |
|-----------|---------|---------|
| `N`  | 8 | width (the design works for any width; 8 is this RTL's choice) |
| `NF` | 2 | number of simultaneous fault slots |

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | N | operands |
| `cin` | in | 1 | carry in |
| `flt` | in | NF x `stage_fault_t` | fault slots |
| `flt_stage` | in | NF x clog2(N) | stage that slot k targets |
| `sum` | out | N | a + b + cin, low N bits |
| `cout`, `cout_n` | out | 1 | carry out and complement |
| `degraded`, `floating` | out | N | per-stage node flags |

A fault slot (`cp_fault_pkg::stage_fault_t`) has the fields `en`, `unit`,
`gate`, `fet` and `kind`:

* `unit` is 0..2 for a replica, or 3 for the voters.
* `gate` inside a replica is 0 = s, 1 = s_n, 2 = co, 3 = co_n. Inside the
  voters it is 0 = s, 1 = co, 2 = co_n.
* `fet` is 0..3 for t1..t4.
* `kind` is CG_SA0, CG_SA1, PG_SA0 or PG_SA1.

If two slots name the same transistor, the lower-numbered slot wins.

Because every stage masks its own single fault, any set of faults with at
most one per stage leaves the sum correct. `tb_ft_rca` checks this with
random cross-stage pairs. It also shows that two faults in one stage can, now
and then, break it.

## What the model does not cover

* **Electrical figures.** Area, delay and leakage have no meaning in a logic
  model. The published comparison gives 60 against 108 transistors, with
  about 15 % less area, 18 % less delay and 12 % less leakage than a 20-nm
  FinFET triple-redundant adder.
* **Voltages.** Noise margins are only flagged by `degraded`, not computed.
* **Faults outside the transistors.** Faults on the operands and on their
  input inverters are not modelled.

## Files

| file | content |
|------|---------|
| `rtl/cp_fault_pkg.sv` | fault kinds, per-transistor control, stage fault slot |
| `rtl/cp_fet.sv` | transistor switch model with fault injection |
| `rtl/cp_tg_cell.sv` | four-transistor cell, node resolution |
| `rtl/cp_xor3.sv`, `rtl/cp_maj3.sv` | XOR3 and MAJ3 gates |
| `rtl/cp_full_adder.sv` | one-bit adder with complemented outputs |
| `rtl/ft_adder_stage.sv` | triplicated, voted stage |
| `rtl/ft_rca.sv` | N-bit adder (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |

Each testbench ends with `TB_RESULT checks=<n> failures=<n>`:

* `tb_cp_xor3` and `tb_cp_maj3` check every single fault against the gate
  characterisation.
* `tb_cp_tg_cell` checks the resolution rule under all single and double
  faults and inconsistent controls.
* `tb_cp_full_adder` reproduces the 40-of-64 result.
* `tb_ft_adder_stage` runs the campaigns in the table above.
* `tb_ft_rca` runs the whole adder at its default width. It covers every
  single fault in every stage, cross-stage and same-stage doubles, and a
  full-length carry ripple.

## Simulating

```
verilator --binary --timing -Irtl -y rtl rtl/cp_fault_pkg.sv tb/tb_ft_rca.sv \
          --top-module tb_ft_rca -o sim
./obj_dir/sim
```

Replace `tb_ft_rca` with any other testbench name. Each run takes seconds.
To lint a module alone:
`verilator --lint-only -Wall -y rtl rtl/cp_fault_pkg.sv rtl/<module>.sv`.
