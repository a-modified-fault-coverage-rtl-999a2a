# Low-power BIST pattern generator (LP-LFSR) with a C17 test harness

During built-in self-test, a pseudo-random pattern generator drives the primary
inputs of the circuit under test (CUT) with vectors that are almost uncorrelated
from one clock to the next. About half the inputs toggle every cycle, and the
CUT burns far more power than it does in normal operation. The LP-LFSR here is
an ordinary 8-bit LFSR changed so that it moves from one LFSR state to the next
in four clock steps instead of one. Each step changes only one half of the
output, and the three vectors it inserts between two LFSR vectors are chosen so
that no input toggles more often than it would between the two LFSR vectors
alone. Spread over four clocks, the input switching per clock drops to about a
quarter. The intermediate vectors are still useful test patterns.

Around the generator sits a small BIST system. It has two copies of the ISCAS-85
C17 benchmark, one of which can carry a stuck-at fault, a comparator that acts
as the response analyzer, and a control unit that runs a test session and
raises an interrupt when the responses disagree.

## How the LP-LFSR steps

The register has 8 flip-flops FF1..FF8, with feedback FF1 <= FF8 xor FF1. This
is the polynomial x^8 + x + 1 (parameter `TAPS`). It is split into a first half
(FF1..FF4) and a second half (FF5..FF8), and each half has its own clock enable.
One extra flip-flop, the *hold flop*, sits between FF4 and FF5. When the first
half shifts, the hold flop captures the bit that leaves FF4. When the second
half shifts later, FF5 takes its input from the hold flop and not from FF4,
which has moved on by then. Because of this, two half-shifts together equal
exactly one shift of a plain LFSR.

Each bit also has an *injector*. The injector looks at a flip-flop's present
value and the value waiting at its D input. If the two agree, the bit will not
change, and the injector passes it through. If they differ, the injector
outputs the random bit R (the output of FF8) instead. Because the vector then
passes through R on its way from the old value to the new one, the bit toggles
at most once over the whole path.

A 2-bit sequencer (`lp_phase_ctrl`) cycles through four steps. The output
multiplexer picks flip-flops or injector for each half:

| step | what is clocked at the edge | output first half | output second half |
|------|-----------------------------|-------------------|--------------------|
| T    | first half + hold flop      | flip-flops        | flip-flops         |
| Ta   | nothing                     | flip-flops        | injector           |
| Tb   | second half                 | flip-flops        | flip-flops         |
| Tc   | nothing                     | injector          | flip-flops         |

Starting from seed `0100_1011` (bits listed FF1..FF8), the generator produces:

| vector | value       |
|--------|-------------|
| T1     | `1010_1011` |
| Ta     | `1010_1111` |
| Tb     | `1010_0101` |
| Tc     | `1111_0101` |
| T2     | `0101_0101` |

Between T1 and T2 the outputs toggle 1 + 2 + 2 + 2 = 7 times. That equals the
Hamming distance between T1 and T2, and the equality holds for every step
(the testbench checks it). In one clock step, only one half of the output
can change.

Every fourth vector (Tb) is a state of the plain LFSR. A session therefore
covers the same LFSR states as a conventional generator, in four times as many
clocks.

Notes on the polynomial: x^8 + x + 1 is not primitive, so the plain LFSR does
not have period 255: from the default seed the states repeat after 63 steps,
so a 64-vector session covers 16 distinct states. It is kept because it is the polynomial the design
specifies. `TAPS` can be changed to any other 8-bit tap mask, with bit 7 = FF1
and bit 0 = FF8.

## The BIST system (`top1`)

```
            +-----------+  lp_out[7:3] -> x0..x4  +------------+ testedout
 seed_i --->|  lp_lfsr  |--------+---------------->| c17_faulty |-----------+
            +-----------+        |   (test mode)   +------------+           v
                 ^               |                 +------------+      +------------+
                 |               +---------------->|    c17     |----->| comparemod |--> result
            +-----------+                          +------------+      +------------+
 start_i -->| bist_ctrl |<-- error ----------------------------------------------+
            +-----------+--> irq_o, done_o, test_mode_o
```

* `lp_lfsr` is the generator. `lfsrout1[7:0]` is the low-power vector,
  `lfsrout1[8]` is the hold flop, and `phase_o` tells which of T/Ta/Tb/Tc is
  shown.
* `c17_faulty` is the circuit under test: C17 plus one stuck-at fault, chosen
  at run time through `fault_i` (`en`, `site`, `sa`). Sites 0..4 are the input
  stems x0..x4. Sites 5..10 are the outputs of NAND1..NAND6. That gives
  22 single stuck-at faults.
* `c17` is the fault-free reference. Its netlist:
  NAND1(x0,x1), NAND2(x1,x3), NAND3(x2,NAND2), NAND4(NAND2,x4),
  y0 = NAND(NAND1,NAND3), y1 = NAND(NAND3,NAND4).
* `comparemod` is the response analyzer. `result` is high in any compared cycle
  where the two responses differ. `error_o` is a sticky flag, and
  `mismatches_o` is a saturating count of failing cycles.
* `bist_ctrl` is the control unit. In normal mode, `func_i` drives both C17
  copies and nothing is compared. Raising `start_i` starts a session:
  1. One cycle loads `seed_i` into the generator and clears the analyzer.
  2. Then come `NUM_VECTORS` (default 64) cycles with one vector each. During
     these cycles the analyzer compares, and any mismatch sets `irq_o`.
  3. Then `done_o` rises and stays high until `start_i` falls.

  `irq_o` stays set until `interrupt_clear_i`. If a new error arrives in the
  same cycle as the clear, the interrupt stays set.

All logic uses one clock and a synchronous, active-high `rst`. Reset loads the
`SEED` parameter. Right after reset or a seed load, the generator is in its Tc
position. Its output is then the Tc form of the seed (first half through the
injector), and the first enabled clock produces T1.

With the default seed and 64 vectors, a session detects all 22 stuck-at faults
of C17.

## Switching activity

`tb_power_c17` takes 256 LFSR states and applies them to C17 in two ways:
directly, one per clock, and through the LP-LFSR, four clocks per state. It
reports:

| measure | conventional, 256 clocks | LP-LFSR, 1024 clocks | per-clock ratio |
|---------|--------------------------|----------------------|-----------------|
| C17 input toggles | 696 | 697 | 0.25 |
| C17 gate-output toggles | 864 | 1146 | 0.33 |

Over the whole run, the inputs switch as often as before. The switching is
spread over four clocks, though, so the power per clock falls to about a
quarter at the inputs. Inside the circuit, the intermediate vectors cause
some extra toggling in total: about 1.3 times as much for the same LFSR
states. So the saving is in peak and average power per clock, not in total
energy per LFSR state. In exchange, a session takes four times as many clocks
to cover the same LFSR states, and it also applies three extra test vectors
per state.

## Where this implementation makes its own choices

The generator's stepping, feedback, seed, injector rule, the choice of R, and
the hold flop follow the design exactly. The following were not specified and
were decided here:

* **Clock enables.** The halves are switched with synchronous clock enables,
  not gated clocks.
* **Reset and start-up.** The synchronous reset, the start-up position (Tc),
  and the seed-load port are choices made here.
* **CUT inputs.** The five C17 inputs are driven by FF1..FF5.
* **Output widths.** `testedout` and `referenceout` are 2 bits, one per C17
  output.
* **Meaning of `lfsrout1[8]`.** The ninth output bit carries the hold flop.
* **Fault injection.** Faults enter through a run-time port, and fanout
  branches are not separate fault sites.
* **Analyzer extras.** The analyzer's enable, sticky flag and counter are
  additions.
* **Control unit.** Its state sequence, the 64-vector session length and the
  interrupt priority are choices made here.
* **Signature compaction.** A MISR is often used to compact responses into a
  signature. There is none here: responses are compared cycle by cycle
  against the fault-free copy.

Not included are the comparison generators often discussed with this idea, such
as PRESTO-style hold-latch generators and column-matching decoders for mixed-mode
BIST. They are alternatives, not parts of this design.

## Files

| file | content |
|------|---------|
| `rtl/lp_pkg.sv` | phase enum `lp_phase_e`, C17 constants, `fault_t` |
| `rtl/lp_injector.sv` | per-half injector (compare present/next, substitute R) |
| `rtl/lp_phase_ctrl.sv` | four-step sequencer: clock enables and output selects |
| `rtl/lp_lfsr.sv` | the LP-LFSR: flip-flops, hold flop, feedback, injectors, output mux |
| `rtl/c17.sv` | fault-free C17 |
| `rtl/c17_faulty.sv` | C17 with a selectable stuck-at fault |
| `rtl/comparemod.sv` | response comparator |
| `rtl/bist_ctrl.sv` | BIST control unit |
| `rtl/top1.sv` | the complete BIST system |
| `tb/lp_tb_pkg.sv` | reference models: plain LFSR, injector, LP vector sequence, C17 with faults |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters of `top1` and `lp_lfsr`: `WIDTH` (8), `TAPS` (`8'b1000_0001`), and
`SEED` (`8'b0100_1011`). `top1` and `bist_ctrl` also take `NUM_VECTORS` (64).
`WIDTH` must be even. The injector and hold-flop structure works for any even
width. The testbench models, however, are written for 8 bits.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. To run the end-to-end test with verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lp_pkg.sv tb/lp_tb_pkg.sv tb/tb_top1.sv --top-module tb_top1 -o sim
./obj_dir/sim
```

Swap in another `tb_<module>.sv` to test one block. The testbenches cover:

* `tb_lp_injector`: all 512 input combinations.
* `tb_lp_phase_ctrl`: the step sequence, its enables, pausing and restart.
* `tb_lp_lfsr`:
  * the T1..T2 example above;
  * 1000 steps with random pauses, checked against a plain-LFSR model;
  * the one-half-per-step and transition-count properties;
  * seed reload.
* `tb_c17`, `tb_c17_faulty`: exhaustive over inputs, and for the faulty
  copy over all 22 faults.
* `tb_comparemod`: random compare, enable and clear traffic.
* `tb_bist_ctrl`: session length, seed-load cycle, interrupt set, clear and
  priority.
* `tb_power_c17`: measures switching activity on C17 against a conventional
  LFSR with the same polynomial and seed (see below).
* `tb_top1`: runs at the default parameters.
  * It covers normal mode, a fault-free session, one session per fault, and a
    session from a random seed.
  * Every vector and response is checked against the models.
  * It reports the fault coverage.
  * It counts that each mechanism occurred: the four step kinds, injector
    substitution, seed load, both modes, and interrupt raise and clear.
