# Single-pass 4-bit barrel shifters from transmission-gate multiplexers

A shift register moves a word one place per clock edge, so a shift by *n*
places costs *n* cycles. A barrel shifter makes the same move in one pass by
giving every output bit its own multiplexer whose inputs are the operand bits
it could receive. The control word picks the same input on every mux, and all
output bits move at once.

This RTL describes a family of three such shifters for a 4-bit operand
`a[3:0]` and a 2-bit control word `s = {s1,s0}`:

| Circuit | Module | What `s` does |
|---|---|---|
| Left rotator | `barrel_left_rotator` | rotate left by `s` places (0 to 3) |
| Right rotator | `barrel_right_rotator` | rotate right by `s` places (0 to 3) |
| Bidirectional shifter | `barrel_bidir_shifter` | `0x`: no shift, `10`: logical left by one, `11`: logical right by one |

Each circuit is one rank of four 4x1 multiplexers. Each 4x1 multiplexer is a
tree of three 2x1 multiplexers, and each 2x1 multiplexer is two CMOS
transmission gates plus one inverter. The RTL keeps that hierarchy so that it
stays recognisable as the transistor circuit it models. It also keeps the
device count: 6 transistors per 2x1 cell, 18 per 4x1 mux and 72 per shifter.
The design uses no clock, no flip-flop and no reset: every result is a
combinational function of `a` and `s`.

## The multiplexer cell

`tg_mux2` models two transmission gates tied to one output node. An inverter
makes `sel_n` from `sel`:

- the gate enabled by `sel_n` passes `i0`;
- the gate enabled by `sel` passes `i1`.

Exactly one gate conducts at a time, so the node is always driven. In logic,
the node is the OR of the two gated paths:

    y = (i0 & ~sel) | (i1 & sel)

This is an ordinary 2:1 mux with `sel = 0` choosing `i0`. The RTL does not
model how strongly each transistor drives a 0 or a 1. Those strengths matter
for the analog circuit but not for the logic function. A lone transmission
gate has no RTL module, because its output floats when it is off, which a
two-state logic model cannot express.

`tg_mux4` builds a 4:1 mux from three `tg_mux2` cells:

    i0 ─┐
        ├─ mux(s0) ─┐
    i1 ─┘           ├─ mux(s1) ── y        y = i[{s1,s0}]
    i2 ─┐           │
        ├─ mux(s0) ─┘
    i3 ─┘

Every shifter depends on this input ordering: input number `{s1,s0}` is the
one that reaches `y`.

## How the three shifters are wired

Everything that distinguishes the three circuits is in which operand bit goes
to which mux input. Mux input *k* of output bit *i* is wired as follows:

| Circuit | input 0 | input 1 | input 2 | input 3 |
|---|---|---|---|---|
| Left rotator | a[i] | a[(i-1) mod 4] | a[(i-2) mod 4] | a[(i-3) mod 4] |
| Right rotator | a[i] | a[(i+1) mod 4] | a[(i+2) mod 4] | a[(i+3) mod 4] |
| Bidirectional | a[i] | a[i] | a[i-1], or 0 for i=0 | a[i+1], or 0 for i=3 |

The resulting truth tables, with outputs listed as y3 y2 y1 y0:

| s1 s0 | Left rotator | Right rotator | Bidirectional |
|---|---|---|---|
| 0 0 | a3 a2 a1 a0 | a3 a2 a1 a0 | a3 a2 a1 a0 |
| 0 1 | a2 a1 a0 a3 | a0 a3 a2 a1 | a3 a2 a1 a0 |
| 1 0 | a1 a0 a3 a2 | a1 a0 a3 a2 | a2 a1 a0 0 |
| 1 1 | a0 a3 a2 a1 | a2 a1 a0 a3 | 0 a3 a2 a1 |

In the rotators, no bit is lost: a bit pushed off one end re-enters at the
other. In the bidirectional shifter, a bit pushed off one end is lost and a 0
fills the vacated end. The RTL gets that 0 by padding the operand with a 0 on
each side (`ext = {0, a, 0}`) and indexing into the padded vector. In the
transistor circuit, the same mux inputs are tied to ground. The bidirectional
shifter moves by one place only. Its two no-shift codes, `00` and `01`, come
from feeding `a[i]` to both mux inputs 0 and 1. `shifter_pkg::bidir_op_e`
names the four codes.

Codes `10` give the same result in both rotators, because rotating a 4-bit
word two places left or right gives the same word.

## Timing

Every shifter is one layer of 4x1 muxes, and each 4x1 mux is two 2x1 cells
deep. The whole shift therefore settles in a single combinational
evaluation, whatever the shift amount. A design that needs the result at a
clock edge should register the inputs or outputs around these modules.
Nothing of the kind is included here. The source circuits were characterised
at the transistor level (picosecond delays, nanowatt power in a 45 nm
process). Those figures belong to that analog implementation, and this RTL
neither reproduces nor checks them.

## Where this RTL makes its own choices

- **Direction of the left rotator.** One prose description of this circuit
  calls its operation a right shift that moves the MSB into the LSB. The
  circuit's truth table, and its name, describe a left rotation. The RTL
  follows the truth table (see above).
- **Bidirectional shifter, not rotator.** The circuit is sometimes called a
  "bidirectional rotator". Its defined behaviour zero-fills and drops bits,
  so it is built as a logical shifter.
- **Pin-level wiring.** The mux input assignments in the table above are
  derived from the truth tables. They are not copied from the schematics'
  individual wires.
- **Mux polarity.** `sel = 0` selects `i0` in the 2x1 cell. This is the only
  polarity for which the 4x1 mux and all three truth tables come out as
  specified.
- **Ports.** Operand and result are vectors `a[3:0]` and `y[3:0]`, where bit
  *i* is pin *ai* or *yi*. The supply pins `vdd` and `gnd` are not ports.
- **Top level.** The three shifters are independent circuits.
  `barrel_shifter_top` places them side by side, each with its own ports:
  `lrot_a/lrot_s/lrot_y`, `rrot_a/rrot_s/rrot_y` and
  `bidir_a/bidir_s/bidir_y`. It adds no logic.
- **Not modelled.** A stand-alone transmission gate, delay, power, and the
  NAND-gate (conventional) version of the barrel shifter, which served only
  as a point of comparison.

## Files

| File | Contents |
|---|---|
| `rtl/shifter_pkg.sv` | `WIDTH = 4`, `SEL_W = 2`, the types `word_t` and `sel_t`, and the bidirectional control codes |
| `rtl/tg_mux2.sv` | 2x1 transmission-gate mux |
| `rtl/tg_mux4.sv` | 4x1 mux from three 2x1 cells |
| `rtl/barrel_left_rotator.sv`, `rtl/barrel_right_rotator.sv`, `rtl/barrel_bidir_shifter.sv` | the three shifters |
| `rtl/barrel_shifter_top.sv` | top level holding all three |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The width is fixed at 4 bits: the mux tree is specifically 4:1 and the wiring
uses `mod 4`. A wider shifter would need a wider mux per bit (or several mux
stages), not just a new parameter value.

## Verification

Each testbench computes its expected results independently, using the
SystemVerilog shift operators and, for the rotators, also a bit-by-bit copy
of the truth table. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog that ends a hung run as a failure.

- `tb_tg_mux2`: all 8 input combinations.
- `tb_tg_mux4`: all 64 combinations of data and select.
- `tb_barrel_left_rotator`, `tb_barrel_right_rotator`: all 64 operand and
  control pairs, checked against the rotate formula and the truth table
  (320 checks each).
- `tb_barrel_bidir_shifter`: all 64 pairs, plus a separate check of the
  zero-filled end bit.
- `tb_barrel_shifter_top`: end to end, in two phases.
  - Phase 1 replays the square-wave stimulus used to characterise the
    circuits. Each input is low for one pulse width and then high for one,
    with pulse widths a0 = 10 ns, a1 = 20 ns, a2 = 30 ns, a3 = 40 ns,
    s0 = 50 ns and s1 = 60 ns. It runs one full 1200 ns common period,
    sampled mid-slot.
  - Phase 2 sweeps all 64 pairs through each shifter, with a different
    operand on each shifter so that crossed wiring would show.
  - It counts each behaviour and fails if one never occurs: wrap-around in
    each rotator, pass-through, both no-shift codes, and logical shifts that
    drop a 1.

Each module was also broken on purpose in one way that matters, and its
testbench then reported failures. The breaks were:

- a missing inverter in the 2x1 cell;
- wrong first-level pairing in the 4x1 mux;
- a rotator tap wired the wrong way;
- wrap-around instead of zero fill in the bidirectional shifter;
- a crossed operand at the top.

To run one testbench with Verilator (5.x):

    verilator --binary --timing --assert -Wall --top-module tb_barrel_shifter_top \
        rtl/shifter_pkg.sv rtl/tg_mux2.sv rtl/tg_mux4.sv rtl/barrel_*.sv \
        tb/tb_barrel_shifter_top.sv
    ./obj_dir/Vtb_barrel_shifter_top

Swap the testbench file and `--top-module` to run another one. The package
must come first on the command line. Every simulation finishes in well under
a second.
