# BCD code converters in majority logic

Three small combinational code converters, written as the gate networks of
tile-based quantum-dot cellular automata (QCA) circuits and modelled with
their clock-zone timing:

| converter | output | equations (digit = A B C D, weights 8 4 2 1) | clock phases |
|---|---|---|---|
| `bcd2gray`  | G3 G2 G1 G0 | G3 = A, G2 = A + B, G1 = B ⊕ C, G0 = C ⊕ D | 3 |
| `bcd2xs3`   | E3 E2 E1 E0 (digit + 3) | E3 = A + B(C + D), E2 = B ⊕ (C + D), E1 = C ⊙ D, E0 = D' | 7 |
| `bcd2aiken` | W X Y Z (2421 code) | W = A + B(C + D), X = A + BD' + BC, Y = A + B'C + BC'D, Z = D | 5 |

In QCA the only logic primitives are the three-input majority gate and the
inverter. A majority gate becomes AND or OR by fixing one input at 0 or 1.
What makes the *tile-based* style cheap is that a majority tile can read any
of its inputs inverted, so a term like A·B' costs no separate NOT gate. With
that, the gray and aiken converters need no NOT gate at all, and the
excess-3 converter needs only a few.

The RTL is synthesizable SystemVerilog. It is a logic- and timing-level model
of these circuits, not a cell layout: it can be simulated, synthesized to
ordinary CMOS, or used as the golden model of a QCA layout.

## Clock zones: how the timing works

This is the part that most differs from ordinary RTL.

A QCA circuit has no flip-flops. Its cells are grouped into *clock zones*, and
a four-phase clock (switch, hold, release, relax) is applied to the zones
with a quarter-cycle shift from one zone to the next. A value therefore moves
one zone forward per clock phase, and every zone behaves like a pipeline
register. A circuit spanning N zones returns its result N phases after its
input, and a new input can enter on every phase.

The RTL models exactly this:

* `clk` is a **phase clock**: one rising edge is one QCA clock phase, a
  quarter of a full QCA clock cycle.
* Every clock zone ends in a register (`qca_wire`, one register per zone
  crossed). Gates (`qca_maj`, `qca_inv`) are combinational and sit between
  zone registers.
* A converter with `PHASES = N` shows, after edge *k*, the code of the digit
  that was on its input before edge *k − N + 1*. It takes a new digit on every
  edge, so throughput is one digit per phase.

The published phase counts give latencies of 0.75, 1.75 and 1.25 QCA clock
cycles for gray, excess-3 and aiken. Each converter module has a `PHASES`
parameter with that default. The gate network of a converter needs fewer
zones than that (3, 5 and 4 zones), and the remaining zones are wire zones
added at the output, so the cycle-level timing matches the published figure.
A larger `PHASES` adds more wire zones; a smaller one than the logic depth is
an elaboration error.

Which gates sit in which zone of the physical layouts is not known, so the
split used here is by logic level:

```
bcd2gray   zone 0: input cells   zone 1: A·B'-type AND tiles, OR(A,B)   zone 2: OR tiles of the XORs
bcd2xs3    zone 0: inputs   zone 1: C+D, D'   zones 2-4: XOR tile for E2; E3 = A + B(C+D) in zones 2-3
bcd2aiken  zone 0: inputs   zone 1: B'C, BC', BD', BC, C+D   zone 2: BC'D, A+B'C, A+BD', B(C+D)
           zone 3: final OR tiles for W, X, Y
```

Shorter paths are carried through wire zones to line up with the longest one,
as a QCA layout must do too.

## Reset

Physical QCA cells have no reset. The RTL adds a synchronous, active-high
`rst` that clears every zone register to 0, so that the outputs are defined
from the first edge. After `rst` is released the outputs read 0000 until the
pipeline fills. Note that 0000 is not the code of digit 0 for excess-3 (0011):
the first `PHASES` outputs after reset are not codes of any input.

## The gate library

| module | what it is | timing |
|---|---|---|
| `qca_maj`   | majority gate Maj(a,b,c) = ab + ac + bc; parameter `INV[2:0]` reads inputs inverted (the tile trick) | combinational |
| `qca_inv`   | NOT gate | combinational |
| `qca_wire`  | wire across `ZONES` clock zones, `WIDTH` bits wide; `ZONES = 0` is a plain connection | `ZONES` edges |
| `tile_xor`  | a ⊕ b = Maj(Maj(a,b',0), Maj(a',b,0), 1): input zone, two AND tiles, one OR tile; no NOT gate | 3 edges |
| `tile_xnor` | a ⊙ b = ab + (a+b)': input zone, AND and OR tiles, then OR with one NOT gate | 3 edges |
| `qca_pkg`   | digit and code types, published phase counts, logic depth of each converter | — |

The XOR tile uses three clock phases, as the published tile does. The XNOR
tile's phase count is not published; three is used.

## The converters

### BCD to gray (`bcd2gray`)

Two XOR tiles make G1 and G0; input C feeds both (in a layout this needs one
wire to cross the others on a second layer). One OR tile makes G2, and G3 is
a wire. No NOT gate. Consecutive digits 0..9 differ in exactly one output bit.

### BCD to excess-3 (`bcd2xs3`)

E0 is D through a NOT gate; E1 an XNOR tile; E2 an OR tile (C + D) feeding an
XOR tile, which is the deepest path at five zones; E3 = A + B(C + D) from an
AND and an OR tile reusing C + D. E3 is derived from the excess-3 truth
table: it is 1 for digits 5 to 9. Two NOT gates are used (E0 and inside the
XNOR tile); the published layout has three, at positions that are not known.
The code is self-complementing: the code of 9 − n is the bitwise complement
of the code of n.

### BCD to aiken / 2421 (`bcd2aiken`)

Aiken weights its bits 2 4 2 1. Digits 0..4 keep their binary pattern; 5..9
become 1011..1111, the choice that makes the code self-complementing (5 could
also be written 0101). All complemented literals (B', C', D') are taken
through inverting tile inputs, so there is no NOT gate. The OR tile C + D
feeds only W; the BC tile feeds only X.

### Non-BCD inputs

Inputs 1010..1111 are not digits. The converters do not flag them; the
outputs are whatever the equations give.

### Top level (`bcd_code_converters`)

The three converters are independent circuits. The top places them side by
side, each with its own BCD input and code output, sharing `clk` and `rst`.
Parameters `GRAY_PHASES_P`, `XS3_PHASES_P` and `AIKEN_PHASES_P` default to
3, 7 and 5.

## Where this departs from the published circuits

* Cells, layers, crossovers and cell counts are not modelled; the RTL is the
  gate network plus one register per clock zone.
* The assignment of gates to clock zones is by logic level, with padding wire
  zones at the output to reach the published phase counts.
* The excess-3 converter uses two NOT gates instead of three.
* The XNOR tile's three-phase timing and internal structure are this design's
  choice.
* Reset is added.

## Verification

Each module has a self-checking testbench in `tb/`. The reference codes come
from arithmetic (`tb_ref_pkg`: gray = n ⊕ (n >> 1), excess-3 = n + 3,
aiken = n for n < 5 and n + 6 otherwise), not from the RTL's equations.

* `tb_qca_maj`, `tb_qca_inv`: exhaustive over inputs and all eight `INV`
  settings.
* `tb_qca_wire`: random data through 0-, 1- and 4-zone wires, exact delay and
  reset.
* `tb_tile_xor`, `tb_tile_xnor`: latency of exactly three edges, then a
  random stream at one input pair per edge.
* `tb_bcd2gray`, `tb_bcd2xs3`, `tb_bcd2aiken`: every digit, the worked
  examples (gray 0110 → 0101, 1001 → 1101; excess-3 0001 → 0100,
  0100 → 0111; aiken 0010 → 0010, 0111 → 1101, 0101 → 1011), exact latency,
  a random stream at one digit per edge, and the one-bit-change or
  self-complementing property. Each runs the published phase count and a
  version with two extra wire zones.
* `tb_bcd_code_converters`: the top at its default parameters. It runs
  reset, latency (3, 7, 5 edges), the worked examples and a 2000-digit random
  stream into all three converters at once. It counts each of these and every
  digit per converter, and fails if any count is zero.

All testbenches pass and print `TB_RESULT checks=N failures=0`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/qca_pkg.sv tb/tb_ref_pkg.sv tb/tb_bcd_code_converters.sv \
    --top-module tb_bcd_code_converters -o sim
./obj_dir/sim
```

Any other testbench runs the same way with its own file and top module name.
The packages must come first on the command line; other modules are found
through `-y`.

To lint the design: `verilator --lint-only -Wall -Irtl -y rtl rtl/qca_pkg.sv
rtl/bcd_code_converters.sv` (clean). Linting a single submodule on its own
reports the package constants it does not use; a `qca_wire` with
`ZONES = 0` leaves its `clk` and `rst` unused, which is why the converters
only instantiate output padding when `PHASES` exceeds their logic depth.
