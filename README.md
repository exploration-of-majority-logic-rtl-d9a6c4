# Majority-logic arithmetic: QCA and NML adders, subtractors and testable reversible adders

Emerging field-coupled nanotechnologies such as quantum-dot cellular automata
(QCA) and nanomagnetic logic (NML) do not offer AND/OR gates as their basic
primitives. They offer an inverter and a *majority voter*. CMOS-style adders
map onto them poorly. This RTL collects arithmetic circuits designed for such
majority-logic fabrics, written as synthesizable SystemVerilog so they can be
simulated, checked and reused as logic models:

* a full adder and a full subtractor that each need only one 3-input and one
  5-input majority gate, and 4-bit ripple carry / ripple borrow versions of
  them, with the clock-zone latencies of their QCA layouts;
* the same adder and subtractor, plus the 5-input majority gate itself, with
  the clock-zone latencies of their multilayer NML layouts;
* two ways to build an n-bit ripple carry adder only from Fredkin gates. The
  result is *conservative reversible*, so any unidirectional stuck-at fault
  can be found with just two test vectors: all 0s and all 1s. A test
  sequencer and ones-count checkers that apply this test are included.

The circuits follow the designs published by C. Labrado (MS thesis,
University of Kentucky, 2017). The clock-zone timing model, the test
sequencer, the checkers and the top-level wiring belong to this RTL. They
are marked as such below and in each file header.

## 1. The key trick: XOR3 from one 5-input majority gate

A full adder needs `Cout = MAJ3(A, B, Cin)` and `Sum = A ^ B ^ Cin`. With
majority gates alone, the XOR usually costs several gates and inverters. The
designs here compute

    Cout = MAJ3(A, B, Cin)
    Sum  = MAJ5(A, B, Cin, ~Cout, ~Cout)

Why this works: `~Cout` is fed in twice, so it has weight two.
* If at most one of A, B, Cin is 1, then Cout = 0 and the two extra inputs
  add two 1s. Sum is 1 exactly when one operand is 1.
* If two or three operands are 1, then Cout = 1 and the extra inputs add
  nothing. The 5-input majority then needs all three operands at 1.

That is the truth table of the three-input XOR. The subtractor
`X - Y - Z` uses the same idea:

    Bout = MAJ3(~X, Y, Z)          (= X'Y + X'Z + YZ)
    Diff = MAJ5(X, ~Y, ~Z, Bout, Bout)

`maj_full_adder` and `maj_full_subtractor` hold these two equations. All
QCA and NML variants reuse them.

## 2. Clock zones and latency

QCA and NML circuits are clocked by a field, not by flip-flops. The cells
are grouped into clock zones. QCA uses four phases per cycle (switch, hold,
release, relax). NML uses three (reset, switch, hold). Zone k is one phase
behind zone k-1: it switches while zone k-1 holds, then holds its own value
for one phase, and is neutral for the rest of the cycle. The result of a
circuit therefore appears a fixed number of phases after its operands.
Because every zone is busy for a whole cycle, a new operand can enter once
per clock cycle, not once per phase.

`clock_zone_pipe` models this. In this RTL, `clk` always means the *zone
clock*: one tick per clock phase. A phase counter, cleared by reset, says
which phase each tick is. Zone k is a register that loads only at the end of
a tick in phase k mod `PHASES`. The pipe gives two strobes:
* `in_take` is high in the tick at whose end the operand is captured. It
  comes once every `PHASES` ticks. Inputs in all other ticks are ignored.
* `q_valid` (called `o_valid` on the wrappers) is high for exactly one
  tick: the hold phase of the output zone, `ZONES` ticks after the
  `in_take` tick. In every other tick it is low and the output simply keeps
  its last value.

The wrappers put the whole latency after the logic:

| module | latency (source) | `ZONES` |
|---|---|---|
| `qca_full_adder` | 0.75 clock cycles | 3 |
| `qca_full_subtractor` | 0.75 clock cycles | 3 |
| `qca_ripple_adder` (4 bit) | 1.5 clock cycles | 6 |
| `qca_ripple_subtractor` (4 bit) | 1.5 clock cycles | 6 |
| `nml_maj5` | output in clock zone 1 | 1 |
| `nml_full_adder` | outputs in clock zone 2 | 2 |
| `nml_full_subtractor` | outputs in clock zone 2 | 2 |

Limits of this model:
* It reproduces when results appear and how many operands are in flight. It
  does not say which gate sits in which zone. The published layouts fix
  that, but they are not modelled here.
* A real cell in its reset/relax phase is neutral: neither 0 nor 1. The
  two-state model has no such value. Outside the hold phase the output keeps
  its old value and `o_valid` is low instead; reset clears the zones to 0.
* For ripple widths other than 4 bits, no latency rule is published. Set
  `ZONES` by hand when you change `N`.

## 3. Fredkin gates out of majority voters

A Fredkin gate is a controlled swap: `P = A`, `Q = A'B + AC`,
`R = AB + A'C`. When the control A is 1, the two target lines exchange
their values. The gate is reversible (one-to-one) and conservative (the
number of 1s stays the same). `fredkin` builds it the way it is realised in
NML:
* four majority voters with one input tied to 0 act as AND gates;
* two voters with one input tied to 1 act as OR gates.

The gate is modelled as combinational logic. The adders below count their
delay in Fredkin gates, not in clock zones.

## 4. Conservative reversible adders

Every adder in this group has *constant lines* (ancilla inputs, tied to 0
or 1 in normal use) and *garbage lines* (outputs kept only so that the
mapping stays one-to-one). Each module brings all of them out as ports:
`anc` and `garb`. This lets a test drive every input line. The normal
constant patterns come from `maj_pkg::cr_m1_ancilla(n)` and
`maj_pkg::cr_m2_ancilla(n)`.

### Method 1: up the word and back down (`crtb1`, `crtb2`, `cr_*_m1`)

Two 3-gate blocks do the work:

* **CRTB 1** (`crtb1`) forms `P = A ^ B` on its constant lines. It then
  swaps the C and A lines under control of P. This leaves
  `R = MAJ(A,B,C)` (the carry) on the A line and `Q = AB' + (A xnor B)C`
  on the C line.
* **CRTB 2** (`crtb2`) is driven with (carry, P, Q). It swaps the same two
  lines back under control of P, which recovers the original C and A. It
  puts `Sum = P ^ C` on its own constant lines.

In the n-bit adder (`cr_ripple_adder_m1`), the CRTB 1 chain runs from bit 0
to bit n-1 and passes each carry R up. One extra Fredkin gate copies the
top carry onto a constant-0 line; that copy is Cout. Fan-out is not allowed
in reversible logic, hence the copy gate. The CRTB 2 chain then runs back
down from bit n-1 to bit 0. Each CRTB 2 restores the carry into its bit and
hands it to the bit below, where it is the "carry" input again. Bit 0
finally returns the original `cin` and all `A` bits (`cin_out`, `a_out`).

Cost: 6n+1 gates. Delay: 3n+4 gates. The signal climbs the word and comes
back.

**Departure from the prose description:** the source text lists the CRTB 2
inputs as (R, Q, P). Its gate diagrams instead feed P to the control input
and Q to the third input. With the text's order the sum is wrong, for
example for A = B = C = 1. The RTL follows the diagrams: CRTB 2 gets
(R, P, Q). One of the fault copies used to validate the testbenches is
exactly the text's order, and the testbench rejects it.

### Method 2: self-contained full adders (`cr_full_adder_m2`, `cr_ripple_adder_m2`)

One 5-gate full adder (`cr_full_adder_m2`):
1. B, then A, swap a 1/0 pair. This leaves `A ^ B`.
2. C swaps a second 1/0 pair. This leaves `~C` and `C`.
3. `A ^ B` swaps the C and A lines. The A line now carries
   `Cout = (A^B) ? C : A`, which is the majority.
4. `A ^ B` swaps the second pair. This leaves `Sum = (A^B) ^ C`.

Step 2 does not depend on step 1, so a bit takes 4 gate delays, not 5.
`cr_ripple_adder_m2` chains n of these adders through the carry. Cost: 5n
gates. Delay: 2n+2 gates.

| bits | cost m1 | cost m2 | delay m1 | delay m2 |
|---|---|---|---|---|
| 1 | 7 | 5 | 7 | 4 |
| 4 | 25 | 20 | 16 | 10 |
| n | 6n+1 | 5n | 3n+4 | 2n+2 |

The gate counts follow from the netlists. The delays are properties of the
gate graph; they are not simulated as time.

## 5. Stuck-at testing with two vectors

A conservative circuit keeps the number of 1s from its inputs to its
outputs. The test drives *every* input line, constants included:
* With all 0s, every internal line of a good circuit is 0. A line stuck at
  1 adds a 1 at the outputs.
* With all 1s, a line stuck at 0 removes a 1.

`cr_ones_checker` compares the population counts of the full input and
output line vectors. Because conservation holds for any input, the same
checker also works as an online check during normal additions.

`cr_test_ctrl` runs the offline test:
* A `start` pulse drives all lines to 0 for one cycle (`test_en=1`,
  `test_val=0`).
* It then drives all lines to 1 for one cycle.
* The checker results are sampled at the end of each of these cycles into
  `sa1_fault` and `sa0_fault` (one bit per unit).
* `done` then rises and stays high, with the flags, until the next start.

The sequencing and the checker are this RTL's own. The source states only
the rule: compare the 1s, using all-0 and all-1 vectors.

## 6. Top level: `majority_arith_top`

The top places the three groups side by side. They do not feed each other.
Each has its own ports; the operand/result structs `fa_in_t`, `fa_out_t`,
`fs_in_t` and `fs_out_t` come from `maj_pkg`.

* **QCA:** `qca_fa_*`, `qca_fs_*`, `qca_rca_*`, `qca_rbs_*`. Operands are
  taken in the tick where `qca_in_take` is high, once every 4 ticks. Each
  result is valid, marked by its `*_valid` output, 3 or 6 ticks later.
* **NML:** `nml_maj5_*`, `nml_fa_*`, `nml_fs_*`. Operands are taken when
  `nml_in_take` is high, once every 3 ticks. Results are valid 1 or 2
  ticks later.
* All units of one technology share the same phase alignment after reset,
  so one take strobe per technology is enough. An assertion in the top
  checks this.
* **CR adders:** the method-1 and method-2 full adders share `cr_fa_i`; the
  two n-bit adders share `cr_a`, `cr_b` and `cr_cin`. All four are
  combinational.
* **Test:** `test_start` launches the two-cycle offline test of all four CR
  units. `test_sa1_fault` and `test_sa0_fault` report the results per unit
  (bit 0 = m1 full adder, 1 = m2 full adder, 2 = m1 ripple, 3 = m2 ripple).
  While `test_busy` is high, the CR sum ports show test responses, not
  sums. `online_mismatch` reports a ones-count mismatch outside a test.

Parameter: `N` (default 4) sets the width of every ripple design.

Reset: `rst_n` is synchronous and active-low. It clears the zone registers
and the test sequencer.

## 7. Files

| file | contents |
|---|---|
| `rtl/maj_pkg.sv` | structs, zone latencies, constant-line patterns |
| `rtl/maj3.sv`, `rtl/maj5.sv` | majority gates |
| `rtl/maj_full_adder.sv`, `rtl/maj_full_subtractor.sv` | MAJ3 + MAJ5 cores |
| `rtl/clock_zone_pipe.sv` | clock-zone timing model |
| `rtl/qca_*.sv`, `rtl/nml_*.sv` | technology wrappers with latency |
| `rtl/fredkin.sv` | Fredkin gate from six majority voters |
| `rtl/crtb1.sv`, `rtl/crtb2.sv`, `rtl/cr_full_adder_m1.sv`, `rtl/cr_ripple_adder_m1.sv` | method 1 |
| `rtl/cr_full_adder_m2.sv`, `rtl/cr_ripple_adder_m2.sv` | method 2 |
| `rtl/cr_ones_checker.sv`, `rtl/cr_test_ctrl.sv` | stuck-at test |
| `rtl/majority_arith_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cr_adder_sizes.sv` | both CR adders at 1, 2, 3 and 4 bits |

## 8. Simulating

Each testbench checks against values it computes itself: integer
arithmetic, counts of ones, or the published truth tables. Each ends with a
line `TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/maj_pkg.sv tb/tb_majority_arith_top.sv --top-module tb_majority_arith_top
    ./obj_dir/Vtb_majority_arith_top

Replace the testbench name to run any other one. `maj_pkg.sv` must be
listed first, because the `-y` search does not find packages.

`tb_majority_arith_top` runs the whole design at its default parameters. It
checks:
* 600 ticks of random inputs to every unit. It checks that QCA and NML
  operands are taken only in their take ticks, that every valid flag rises
  exactly at the published latency and at no other tick, and that the
  results are right;
* full carry and borrow ripple;
* a fault-free offline test;
* stuck-at-1 and stuck-at-0 faults forced on internal lines of each CR
  adder type, each caught by the offline test and by the online check;
* a clean test again after the faults are released.

It reports how often each of these happened. It runs in well under a
second.

## 9. How far to trust it, and what is not here

* **Verified:** exhaustive truth tables for every gate, CRTB block and full
  adder/subtractor. All 512 operand combinations of each 4-bit adder. The
  conservative and one-to-one properties over every assignment of the input
  lines of the gates, the CRTB blocks and the CR full adders (randomly for
  the n-bit adders). Exact latency and take/valid timing of every clocked wrapper, and of the
  zone model for several zone counts with both clock styles.
* **Not modelled:** anything physical. That includes the QCA cell layouts,
  cell counts, area and simulation settings, the multilayer NML cell stacks
  and vias, and the clock fields themselves. The cost figures of the
  original layouts (cells, µm², Cost = Area × Latency²) therefore cannot be
  reproduced from this RTL.
* **Modelling choices of this RTL:** all latency sits at the output of a
  unit, not between its gates. One operand per clock cycle. The neutral cell
  state is replaced by a held old value with the valid flag low.
  The Fredkin gate has no latency of its own.
