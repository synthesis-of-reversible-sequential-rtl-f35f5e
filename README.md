# Reversible latches and flip-flops

A reversible circuit computes a bijection: every output pattern comes from
exactly one input pattern, so no information is erased and, in principle, no
Landauer heat is dissipated. Combinational reversible logic is well studied;
sequential circuits also need reversible storage elements. This RTL is a
library of such elements — D, T and JK latches and D, T and JK flip-flops —
built only from reversible gates (Toffoli, Fredkin, Feynman and NOT), each
with the smallest gate count this construction reaches.

The idea behind the latches: instead of taking a conventional latch
(NAND/NOR gates) and swapping each gate for a reversible one, start from the
latch's next-state truth table, add just enough extra outputs ("garbage
outputs") to make the table a bijection, and pick those extra columns so that
the table is one known reversible gate, or a short cascade of them. A D latch
then needs one Fredkin gate, a T latch one Toffoli gate, and a JK latch three
Toffoli gates, plus one Feynman gate each to copy the output for the feedback
path.

## Reversible gates

All gates pass their control lines through unchanged.

| Gate | Module | Lines in → out | Function |
|------|--------|----------------|----------|
| Toffoli TOF(C;T), any number of controls | `rev_toffoli #(NCTRL)` | controls, target | target ^= AND of the controls |
| Feynman (2-bit Toffoli, CNOT) | `rev_feynman` | x, y → x, x^y | with y = 0: a copy of x |
| Fredkin (controlled swap) | `rev_fredkin` | x, y, z | if x = 1, y and z are exchanged |
| NOT (Toffoli with no controls) | `rev_not` | a → ~a | |

A reversible network does not allow fanout: each net drives exactly one gate
input. Wherever a value is needed twice, a Feynman gate with a constant-0
target makes the second copy. That is why every latch below ends in a Feynman
gate: one copy of Q_{n+1} leaves the latch, the other is fed back as the next
Q_n.

The constant-0 inputs are ancilla lines. Outputs that only exist to keep the
function a bijection are garbage outputs. The modules bring out every garbage
output as a port (suffix `_g`), so each element keeps its full
inputs-equals-outputs shape.

## The latches

Notation: C is the latch's clock level `clk`, Q_n the stored value,
Q_{n+1} the next value. A primed name (clk', D', …) is a garbage output.

### D latch — one Fredkin gate (`rev_d_latch`)

Extended table, rows (C, D, Q_n) → (C', D', Q_{n+1}):

| C D Q_n | C' D' Q_{n+1} |
|---------|---------------|
| 000 | 000 |
| 001 | 001 |
| 010 | 010 |
| 011 | 011 |
| 100 | 100 |
| 101 | 110 |
| 110 | 101 |
| 111 | 111 |

This is the Fredkin gate's table with C on the control line, Q_n on the first
swapped line and D on the second. While C = 1 the lines swap, so Q_{n+1} = D
and D' carries the old Q_n. While C = 0 nothing moves. Algebraically,
Q_{n+1} = D·C ⊕ Q_n·C̄. Cost: 2 gates (Fredkin, Feynman) and 2 garbage
outputs (C', D').

### T latch — one Toffoli gate (`rev_t_latch`)

Q_{n+1} = T·C ⊕ Q_n is exactly a 3-bit Toffoli gate with T and C as controls
and Q_n as target. T and C pass through as the garbage outputs T' and C'.
Cost: 2 gates, 2 garbage outputs.

### JK latch — three Toffoli gates (`rev_jk_latch`)

The JK rule is too irregular for a single gate. Its extended table, rows
(C, J, K, Q_n) → (C', J', K', Q_{n+1}), is the identity for C = 0. For C = 1
it is:

| C J K Q_n | C' J' K' Q_{n+1} | JK action |
|-----------|------------------|-----------|
| 1000 | 1000 | hold |
| 1001 | 1001 | hold |
| 1010 | 1010 | reset |
| 1011 | 1110 | reset |
| 1100 | 1101 | set |
| 1101 | 1011 | set |
| 1110 | 1111 | toggle |
| 1111 | 1100 | toggle |

The garbage columns J', K' are chosen so that the eight C = 1 outputs are a
permutation of the eight C = 1 inputs. Transformation-based synthesis turns
this permutation into a cascade. Walk the rows in order. At the first row
whose output differs from its input, add a Toffoli gate at the output end that
fixes the 0→1 bits first, and do not disturb any earlier row. Repeat until
every row maps to itself. Then reverse the list of gates. The result, from
input to output:

1. TOF(C, J, Q_n ; K)  gives K' = J·C·Q_n ⊕ K
2. TOF(C, Q_n, K' ; J)  gives J' = K'·Q_n·C ⊕ J
3. TOF(C, J' ; Q_n)  gives Q_{n+1} = J'·C ⊕ Q_n

Expanded: Q_{n+1} = J·C ⊕ Q_n ⊕ Q_n·C·K ⊕ Q_n·C·J. For C = 0 that is Q_n.
For C = 1 it is J·Q̄_n + K̄·Q_n, the JK characteristic equation. With the
Feynman copy the cost is 4 gates and 3 garbage outputs (C', J', K'). In the
module the wires between the gates are named after the gate stage:
`k1`/`j1`/`q1` after gate 1, `j2`/`q2`/`k2` after gate 2 and `q3` after
gate 3.

## The flip-flops

Each flip-flop is the textbook master–slave arrangement, with every part
reversible. The master latch is clocked by `clk`. A NOT gate inverts the
master's clock garbage output C' to clock the slave. The slave is always a
D latch, and its D input is the master's Q_{n+1}. The slave's C' (= not clk)
is the flip-flop's clock garbage output.

| Module | Master | Cost (gates / garbage) | Garbage outputs |
|--------|--------|------------------------|-----------------|
| `rev_d_ff`  | D latch  | 5 / 3 | `clk_g`, `dm_g` (master D'), `ds_g` (slave D') |
| `rev_t_ff`  | T latch  | 5 / 3 | `clk_g`, `t_g` (T'), `ds_g` |
| `rev_jk_ff` | JK latch | 7 / 4 | `clk_g`, `j_g`, `k_g`, `ds_g` |

The master is transparent while `clk` = 1 and the slave while `clk` = 0, so
`q` changes only after a falling edge of `clk`:

| clk | D FF next q | T FF next q | JK FF next q |
|-----|-------------|-------------|--------------|
| 0 or 1, steady | Q_n | Q_n | Q_n |
| falling edge | D | T ? ~Q_n : Q_n | 00: Q_n, 01: 0, 10: 1, 11: ~Q_n |

D, T, J and K are their values during the clock pulse. The master keeps its
own state through its own feedback copy. The slave follows the master's
output.

## Modelling the feedback loop: `tick` and pulse width

This is the part that most needs care when using the RTL.

In the circuits above, the second copy of Q_{n+1} is wired straight back to
the Q_n input. As a real zero-delay wire loop this is a combinational loop. A
D latch loop would settle, but a T latch with T = C = 1 has no stable point.
The RTL therefore models the loop as one register per latch, clocked by an
extra input `tick`:

- Each rising edge of `tick` is one step n → n+1 of the truth tables:
  `Q_n <= copy of Q_{n+1}`.
- `clk`, the element's own clock, is an ordinary data input of the gates, a
  level. Between `tick` edges every output is a combinational function of the
  inputs and the stored Q_n, exactly as in the tables. So a D latch is
  transparent at once while `clk` = 1.
- `rst_n` is an asynchronous active-low reset of the stored states (to 0).

Both `tick` and `rst_n` belong to this model, not to the reversible circuit
itself.

Consequence for the T and JK elements: while `clk` is high, the master acts
once per `tick`. A T latch with T = 1 toggles on every tick, and a JK latch
with J = K = 1 likewise. The flip-flop behaviour table (one toggle per clock
pulse) therefore holds when every `clk` pulse is high for exactly one `tick`.
That is the "pulsed" clock these elements are meant to be driven with. Wider
pulses give one master update per high tick: the race-around of a level-
triggered master. The flip-flop testbenches check both regimes. The D
flip-flop is insensitive to pulse width: it takes D from the last high tick.

Drive the inputs away from the rising edge of `tick` (the testbenches change
them on the falling edge).

## Assertions

- Every latch: `a_hold` — while `clk` is 0 the stored Q_n does not change.
- Every flip-flop: `a_edge` — `q` is unchanged from one `tick` to the next
  unless `clk` has just fallen.

Both are concurrent assertions sampled on `tick` and disabled during reset.

## Files and hierarchy

```
rev_seq_top        all six elements side by side, ports prefixed dl_, tl_, jl_, dff_, tff_, jkff_
├── rev_d_latch    rev_fredkin + rev_feynman
├── rev_t_latch    rev_toffoli #(2) + rev_feynman
├── rev_jk_latch   rev_toffoli #(3) x2, rev_toffoli #(2), rev_feynman
├── rev_d_ff       rev_d_latch, rev_not, rev_d_latch
├── rev_t_ff       rev_t_latch, rev_not, rev_d_latch
└── rev_jk_ff      rev_jk_latch, rev_not, rev_d_latch
```

The six elements are independent; the top only shares `tick` and `rst_n`.
Every element port is brought out with its prefix, e.g. `jkff_j`, `jkff_k`,
`jkff_clk`, `jkff_q`, `jkff_j_g`. No module has parameters except
`rev_toffoli` (`NCTRL`, number of control lines, default 2, minimum 1).

All RTL is synthesizable. A conventional synthesis tool will of course fold
the gates into ordinary logic and flops. The reversible structure — one module
instance per reversible gate, every garbage output kept — is what the
hierarchy records. The gate and garbage counts in the tables above are the
instance and `_g` port counts of the RTL.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog if
it hangs.

- Gates: exhaustive comparison with their truth tables, plus checks that each
  gate is a bijection and (Toffoli, Fredkin) its own inverse.
- Latches: several hundred random steps compared row by row with the extended
  tables above, all outputs including garbage. A reset in mid-run is checked
  to clear the state. The JK test also checks that the table is a permutation
  and compares `q` with the plain JK rule.
- Flip-flops: random data and random clock pulses, compared with the behaviour
  table. Also compared every step: `clk_g` = ~clk, the pass-through garbage
  outputs, and the slave's D' (during a pulse it carries the value the
  flip-flop is about to take).
- `tb_rev_seq_top`: all six elements at once for 2000 steps, with a reset in
  mid-run. It counts each behaviour — latch transparent/opaque, T toggle, JK
  hold/reset/set/toggle, flip-flop capture of 0 and 1, T and JK flip-flop
  toggles, reset — and fails if one never occurs.

Running one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_rev_seq_top \
    tb/tb_rev_seq_top.sv -Mdir obj_top -o sim
./obj_top/sim
```

Swap in any other `tb_*` name for a single block. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/rev_jk_ff.sv`. The only warning
is SYNCASYNCNET: `rst_n` is both the asynchronous reset of the feedback
registers and the `disable iff` condition of the assertions.

## Scope and departures

- The `tick` step clock, the reset, and the one-register model of each
  feedback wire are this implementation's choices (see above). The reversible
  gate networks themselves follow the constructions described here gate for
  gate.
- A complete reversible sequential circuit places reversible combinational
  logic in front of these elements and returns their outputs to it. That
  combinational part is application-specific and is not included. The global
  source that pulses every element's `clk` is not modelled either: the
  testbenches drive the pulses.
- The reversible RS latches and the direct-transformation designs that these
  elements improve on are not part of this library.
