# Oscillation-testable finite state machine

A sequential circuit can be tested at its full clock rate without storing any
expected responses. The trick is to make part of the circuit oscillate on
purpose. Pick two states of the FSM whose outputs differ under the same input.
If the FSM can be forced to alternate between those two states on every clock,
the output toggles on every clock. The tester only has to check that the output
keeps toggling:

* A stuck-at fault on any net the oscillation passes through stops the toggling.
* A net that is too slow to switch within one clock period breaks it as well,
  because every clock is a real launch-and-capture at speed.

A normal FSM does not alternate between arbitrary state pairs. So each state
flip-flop is replaced by a **Modified State Register (MSR) cell**. In test mode
the cell can bend the next-state function of its own bit in one of four ways.
The cell settings and the starting state are loaded through a scan path.

This repository holds the RTL of the MSR cell, of a scan-chained MSR register and
of a small six-state example FSM built with it. It also holds testbenches that
generate the oscillation tests for the example and apply them, including under
injected faults.

## The MSR cell (`rtl/msr_cell.sv`)

Each cell has three flip-flops, `s2`, `s1` and `s0`, chained as a scan segment
`scan_in -> s2 -> s1 -> s0 -> scan_out`. The `s0` flip-flop is the state bit in
every mode: its output `q` feeds the FSM's combinational logic.

| mode | condition | `s0` on the clock edge |
|---|---|---|
| scan | `scan_en = 1` | shifts (`s2 <= scan_in`, `s1 <= s2`, `s0 <= s1`) |
| normal | `test_mode = 0` | `d` (an ordinary D flip-flop) |
| Hold 0 / Hold 1 | `test_mode = 1`, `s1 = 0` | keeps its value (the 0 or 1 loaded by scan) |
| INV | `test_mode = 1`, `s1 = 1`, `s2 = 0` | `~d` |
| Bypass | `test_mode = 1`, `s1 = 1`, `s2 = 1` | `d` |

So `s1` selects hold or sample, and `s2` selects the polarity. `s0` serves as
the held value in the hold operations and as the initial state bit otherwise. A
single scan load therefore sets both the operation and the starting state. The
control bits do not change outside scan.

Every change happens on the clock edge. The "oscillation rings" run from a cell's
output through the combinational logic and back into the cell. The clock cuts
them, so they cannot race, and they toggle exactly once per cycle.

Design choices not fixed by the underlying method:

* The order of the flip-flops in the scan segment.
* Scan taking priority over test mode.
* An asynchronous active-low reset that clears all three flip-flops. This gives
  state 0 in normal mode and Hold 0 in test mode.

An asynchronous variant of the cell also exists: two control bits, with INV and
Bypass as combinational paths that form free-running ring oscillators. It is not
built here. Its rings race against each other, which is exactly what the clocked
cell avoids.

## Choosing the cell operations for a state pair

This is the heart of the method. The testbenches do it, using the functions in
`rtl/msr_pkg.sv`.

Take two transitions under the same input value, `p_i -> n_i` and `p_j -> n_j`,
whose outputs differ. In test mode the goal is `p_i -> p_j -> p_i -> ...`. Look
at one state bit `k`. In each transition that bit is Low (0→0), Rising (0→1),
Falling (1→0) or High (1→1). The pair of classes decides which cell operation
turns the normal next-state bit into the wanted one (`bit_opval`, `msr_select`):

|         | L      | H      | R      | F      |
|---------|--------|--------|--------|--------|
| **L**   | Bypass | INV    | Hold 0 | fail   |
| **H**   | INV    | Bypass | fail   | Hold 1 |
| **R**   | Hold 0 | fail   | INV    | Bypass |
| **F**   | fail   | Hold 1 | Bypass | INV    |

Reasoning for one entry, {R, F}: the first state has bit 0 and its next bit is 1,
which is exactly the second state's bit. The second state has bit 1 and its next
bit is 0, which is the first state's bit. So the natural next-state bit is already
right in both directions, and the cell is set to Bypass.

"fail" means that no single operation can serve both transitions. {R, H} is an
example: one transition needs next = 1 from a normal next value of 1, and the
other needs next = 0 from a normal next value of 1. A pair with a failing bit
gives no test. `msr_ctrl` turns an operation and an initial bit into the cell's
three scan bits.

The table is symmetric, and the anti-diagonal is all "fail". When several
operations would work for a bit, the table's choice is used: Bypass or INV rather
than a hold. For example, {L, L} gives Bypass even though Hold 0 would also work.

## The example FSM (`rtl/fsm_example_logic.sv`, `rtl/osc_fsm_top.sv`)

The example FSM has one input `x` and one Mealy output `y`. Its states `a`..`f`
are encoded as `000`..`101`:

| state | next, x=0 | next, x=1 | y, x=0 | y, x=1 |
|---|---|---|---|---|
| a 000 | a | c | 1 | 0 |
| b 001 | d | b | 1 | 0 |
| c 010 | f | d | 1 | 1 |
| d 011 | c | a | 0 | 1 |
| e 100 | e | f | 0 | 0 |
| f 101 | b | e | 1 | 1 |

The codes `110` and `111` are unused. Here they go to `a` with `y = 0`, which is
a choice of this design.

Three examples show how pairs are handled:

* **(e, f) with x = 1** alternates without help. Every cell is in Bypass.
* **(a, e) with x = 0** needs INV on bit 2 and Bypass on bits 1 and 0.
* **(b, e) with x = 0** needs INV, Hold 0 and INV (bit 2 down to bit 0). This
  turns b→d, e→e into b→e, e→b.

Under x = 0 there are 8 state pairs whose outputs differ, and under x = 1 there
are 9. Seven of these 17 pairs pass the table, so they give the seven
oscillation tests. Ten are rejected.

`osc_fsm_top` is the example logic plus a three-cell `msr_register`. Its ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock; also the oscillation clock |
| `rst_n` | in | 1 | asynchronous, active low |
| `x` | in | 1 | primary input, held during a test |
| `test_mode` | in | 1 | 1 = oscillation test |
| `scan_en` | in | 1 | shift the MSR scan path |
| `scan_in`, `scan_out` | in/out | 1 | scan path |
| `y` | out | 1 | primary output, observed for oscillation |
| `present_state` | out | 3 | state bits, brought out for observation |

### Applying one oscillation test

1. With `scan_en = 1`, shift the 9-bit image in, bit 0 first. Cell `k`'s
   `{s2,s1,s0}` sits at image bits `[3k+2:3k]`. Set `s0` to the bit of `p_i` for
   INV/Bypass cells.
2. Drop `scan_en`, hold `x`, raise `test_mode`.
3. From then on `y` must change on every rising clock edge, giving a square wave
   at half the clock rate. `present_state` alternates between `p_i` and `p_j`.
4. Drop `test_mode`. Shifting 9 bits out returns the unchanged control bits and
   the current state.

The same path also serves ordinary scan tests. Shift a state in (control bits
0), give one clock with `test_mode = 0`, and shift the captured next state out.
Faults that no oscillation test reaches are left to such tests.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb/msr_cell_tb.sv` | every control word in test mode; a one-cell INV ring toggling each clock; normal mode; 5000 random cycles against a reference model |
| `tb/msr_register_tb.sv` | 4-bit register: scan images come out unchanged one load later; per-cell test-mode operations; normal mode |
| `tb/fsm_example_logic_tb.sv` | all 16 state/input combinations against the table |
| `tb/osc_fsm_top_tb.sv` | normal-mode random walk; generation and application of all 7 tests; per-test toggling and alternation; scan read-back; the three examples above; scan tests through the MSR path; counts each mechanism and fails if one never happens |
| `tb/osc_fault_coverage_tb.sv` | fault injection on the nets between logic and register; compares the hardware against a behavioural model of each faulty circuit; reports coverage |

`osc_fsm_top_tb` also checks the table against the hardware. For each of the 17
candidate pairs it tries all 64 combinations of cell operations. Some
combination makes the pair alternate exactly for the 7 pairs that the table
accepts.

The fault-coverage testbench injects faults on 8 nets: `x`, the three
present-state bits, the three next-state bits and `y`. Each net gets four
faults: stuck-at-0, stuck-at-1, slow-to-rise and slow-to-fall. A slow net
still shows its previous-cycle value when sampled at speed. The first test clock
after the scan load counts as the launch clock. With the 7 tests:

* all 16 stuck-at faults are detected;
* 14 of the 16 transition faults are detected.

The two that are missed are slow transitions on `x`. They cannot be caught
because `x` is held during a test.

To run one testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module osc_fsm_top_tb \
    -y rtl -y tb +libext+.sv rtl/msr_pkg.sv tb/osc_fsm_top_tb.sv
./obj_dir/Vosc_fsm_top_tb
```

Substitute the testbench name for the others. The simulator is two-state: all
state is reset, and the testbenches initialise everything they read.

## Using it for another FSM

`msr_register #(.STATE_BITS(n))` is generic. Replace `fsm_example_logic` with the
target FSM's next-state and output logic, and wire it as in `osc_fsm_top`. Then
generate tests in the same way for every pair of transitions that have
compatible inputs and differing outputs. With a multi-bit input, the test input
is the intersection of the two input cubes.

Each cell costs two flip-flops more than a plain state flip-flop, plus a small
amount of logic. A state assignment chosen with this test in mind can turn more
pairs into tests, and can let some cells drop operations they never use. Neither
is done here: the example keeps its given encoding, and every cell supports all
four operations.

## Limits and departures

* Only the example FSM is built. The benchmark FSMs the method was evaluated on
  (21 circuits, 4 to 218 states) need their own transition tables, which are not
  reproduced here. The reported test efficiencies (90% on average from
  oscillation tests alone) are therefore not reproduced either.
* Deciding whether a test passed is left to the tester: "`y` toggles on every
  clock". There is no on-chip oscillation detector.
* Test generation runs in the testbench, not in hardware.
* Some details are choices of this design: the scan order, the reset, the
  handling of unused state codes and the exposed `present_state` port. Each is
  stated in the comment at the head of the file concerned.
