# Parity-preserving reversible adder/subtractor (P2RG + Fredkin)

A reversible gate maps its inputs to its outputs one-to-one: no input
pattern is lost, so in principle no information (and no energy tied to
erasing it) is thrown away. A *parity-preserving* reversible gate has the
further property that the XOR of all its outputs equals the XOR of all
its inputs, so a single stuck or flipped line shows up as a parity error.

This design builds a one-bit cell that is a full adder **or** a full
subtractor, chosen by one control line, out of only two such gates:

* **P2RG**, a 5-input/5-output parity-preserving gate that produces the
  sum/difference, the carry and the borrow of two operand bits and a
  carry/borrow in, all at once;
* a **Fredkin gate** (controlled swap) that picks the carry or the borrow
  according to `Ctrl`.

The cell is then chained into a word-wide adder/subtractor (8 bits by
default), and a half adder/subtractor variant (same two gates, carry-in
tied low) is provided beside it.

Everything here is combinational: no clock, no reset, no latency beyond
gate delay.

## Operation select

| `ctrl` | `p2rg_pkg::op_e` | result on `sum` | `cout_borrow` |
|---|---|---|---|
| 0 | `OP_ADD` | `a + b + cin` (mod 2^W) | carry out |
| 1 | `OP_SUB` | `a - b - cin` (mod 2^W) | borrow out, 1 when `a < b + cin` unsigned |

In subtract mode `cin` is a borrow in, and `a` is the minuend.

## The gates

### Fredkin gate (`frg`)

    P = A
    Q = A'B + AC     (B if A = 0, C if A = 1)
    R = AB + A'C     (C if A = 0, B if A = 1)

The two data lines are swapped when the control `A` is 1. It keeps the
number of ones, so it also keeps parity. The two product terms in `Q`
(and in `R`) never hold together, so the OR form and the XOR form
`A'B ^ AC` are the same function. An immediate assertion in `frg` checks
parity on every evaluation.

### P2RG (`p2rg`): what it must do

Only the gate's outputs are specified. The cells drive it as
`a = B, b = A, c = 0, d = Cin, e = 0` and use:

| pin | signal |
|---|---|
| `p` | garbage g1 |
| `q` | S/D = A ^ B ^ Cin |
| `r` | Cout = (A ^ B)·Cin ^ A·B |
| `s` | Bor = A'·B ^ (A ^ B)'·Cin (borrow of A − B − Cin) |
| `t` | garbage g2 |

With `d = 0` the same pins give the half adder/subtractor:
`q = A ^ B`, `r = A·B`, `s = A'·B`.

### P2RG: how this implementation does it

The gate's insides, its garbage outputs and its behaviour when `c` or
`e` is 1 are this implementation's choice. It is a cascade of four gates
that are each reversible and parity-preserving, so the 5×5 map as a whole
is a bijection that keeps parity, by construction:

| stage | gate | control | targets | effect with c = e = 0 |
|---|---|---|---|---|
| 1 | double Feynman (`f2g`) | d | e, c | copy Cin onto both constant lines |
| 2 | double Feynman | a | b, c | b ← A ^ B, c ← B ^ Cin |
| 3 | Fredkin | b (= A ^ B) | a, d | swap B and Cin when A ≠ B |
| 4 | double Feynman | e (= Cin) | b, c | b ← A ^ B ^ Cin, c ← B |

Stage 3 is the key step. When A = B the carry equals B and the borrow
equals Cin. When A ≠ B it is the other way round: the carry equals Cin,
and the borrow equals B. So one controlled swap, controlled by A ^ B,
turns the lines (B, Cin) into (Cout, Bor).

The double Feynman gate is `p = a, q = a ^ b, r = a ^ c`. It flips either
zero or two lines, so it keeps parity.

The resulting general map, with `x = a ^ b`:

    p = a ^ c ^ e          (g1 = B in use)
    q = a ^ b ^ d ^ e      (S/D)
    r = x ? d : a          (Cout)
    s = x ? a : d          (Bor)
    t = d ^ e              (g2 = Cin in use)

Any other bijective, parity-preserving 5×5 map with the same `q`, `r` and
`s` for `c = e = 0` would be an equally valid P2RG. Only `p`, `t` and the
`c`/`e` behaviour would change.

## The adder/subtractor cells

`p2rg_fas` (full) and `p2rg_has` (half) are the same circuit. In each,
`p2rg` feeds its Cout into data input B of the Fredkin gate and its Bor
into data input C. `ctrl` goes to the Fredkin control, so its middle
output `Q` is Cout for `ctrl = 0` and Bor for `ctrl = 1`. `p2rg_has` ties
the P2RG's Cin pin to 0.

Per cell:

* 2 gates;
* 2 constant inputs (P2RG `c` and `e`);
* 4 garbage outputs:
  * g1 = B;
  * g2 = Cin;
  * g3 = a copy of Ctrl;
  * g4 = whichever of carry/borrow was not selected.

The cells bring the garbage out on `g[4:1]`, so the cell as a whole stays
reversible and parity-preserving. Output parity equals `a ^ b ^ cin ^ ctrl`.

## Word-wide adder/subtractor (`p2rg_addorsub8bit`)

`WIDTH` cells (default 8) are chained in ripple fashion: the carry/borrow
out of cell i is the `cin` of cell i+1. Each cell selects carry or borrow
itself, so the same chain ripples carries when adding and borrows when
subtracting.

Reversible logic forbids fan-out, so `ctrl` is not broadcast. Cell 0
receives it, and each cell hands the copy that its Fredkin gate returns
on g3 to the next cell. The last copy leaves on `ctrl_out`. The remaining
garbage of cell i leaves on `garbage[i] = {g4, g2, g1}`.

With this arrangement every internal line drives exactly one gate input.

The delay is linear in `WIDTH`: one P2RG and one Fredkin stage per bit on
the carry/borrow path.

## Top level (`p2rg_addsub_top`)

The word-wide adder/subtractor and the half adder/subtractor sit side by
side with independent ports. The half adder/subtractor ports have the
prefix `ha_`. Both `ctrl` inputs are plain 1-bit signals (0 add,
1 subtract).

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | operands (a is the minuend) |
| `cin` | in | 1 | carry/borrow in |
| `ctrl` | in | 1 | 0 add, 1 subtract |
| `sum` | out | WIDTH | sum / difference |
| `cout_borrow` | out | 1 | carry / borrow out |
| `ctrl_out` | out | 1 | Ctrl copy from the last cell |
| `garbage` | out | WIDTH×3 | {g4, g2, g1} per cell |
| `ha_a`, `ha_b`, `ha_ctrl` | in | 1 | half adder/subtractor inputs |
| `ha_sd`, `ha_cout_borrow` | out | 1 | half sum/difference, carry/borrow |
| `ha_garbage` | out | 4 | g1..g4 |

## What follows the original design and what is added here

Taken from the original design:

* the P2RG pin order;
* the functions of its sum, carry and borrow outputs;
* the Fredkin gate equations;
* the wiring of the half and full cells: P2RG outputs `r`/`s` go to
  Fredkin inputs B/C, Ctrl goes to the Fredkin control, and the selected
  result comes out on Fredkin `Q`;
* the name and 8-bit width of the word-level block, and its ports `a`,
  `b`, `cin`, `ctrl`, `sum` and carry/borrow.

Chosen here:

* the inside of P2RG, and so the values of its garbage outputs;
* tying the unlabeled fifth P2RG input to 0;
* the encoding `ctrl = 0` for add. It follows from the Fredkin equation
  with carry on B, and matches a full-adder waveform taken with the
  select line at 0;
* how cells are combined into a word (ripple chain);
* passing Ctrl from cell to cell to avoid fan-out;
* bringing garbage lines out as ports.

The original design only looks ahead to wider words (16, 32 and 64 bits).
Here they are just `WIDTH` settings, and the tests cover them.

A note on trust: in a CMOS flow this RTL synthesises to ordinary
irreversible gates (AND/OR/XOR). The reversibility and parity properties
hold for the logical function, and the testbenches check them. Nothing in
the RTL makes the silicon itself reversible or low-power.

## Files

| file | content |
|---|---|
| `rtl/p2rg_pkg.sv` | `op_e` (OP_ADD / OP_SUB) |
| `rtl/f2g.sv` | double Feynman gate (helper) |
| `rtl/frg.sv` | Fredkin gate |
| `rtl/p2rg.sv` | P2RG 5×5 gate |
| `rtl/p2rg_has.sv` | half adder/subtractor |
| `rtl/p2rg_fas.sv` | full adder/subtractor cell |
| `rtl/p2rg_addorsub8bit.sv` | WIDTH-bit ripple adder/subtractor |
| `rtl/p2rg_addsub_top.sv` | top level |

## Verification

Each testbench checks itself against integer arithmetic written
independently of the RTL. Each prints `TB_RESULT checks=N failures=M`,
and each has a watchdog.

| testbench | what it covers |
|---|---|
| `tb/frg_tb.sv` | all 8 inputs; swap behaviour, ones preserved, outputs unique |
| `tb/p2rg_tb.sv` | all 32 inputs; parity preserved and bijective; S/D, Cout, Bor, g1, g2 for c = e = 0 |
| `tb/p2rg_has_tb.sv` | all 8 (A, B, Ctrl) patterns; outputs unique |
| `tb/p2rg_fas_tb.sv` | A, B, Cin through all 8 patterns as a full adder, then as a full subtractor; parity, uniqueness |
| `tb/p2rg_addorsub8bit_tb.sv` | all 2^18 (a, b, cin, ctrl) patterns at 8 bits |
| `tb/p2rg_addorsub_wide_tb.sv` | WIDTH = 16, 32, 64: full-length carry/borrow chains plus 4000 random vectors each |
| `tb/p2rg_addsub_top_tb.sv` | top at default parameters: corner cases and 20000 random vectors (details below) |

The top-level test also does these things:

* it drives the half adder/subtractor at the same time;
* it checks the garbage lines and `ctrl_out`;
* it counts each mechanism (add, subtract, carry out, borrow out, a
  carry/borrow through every cell, a carry/borrow in, the half adder's
  carry, the half subtractor's borrow), and fails if any of them never
  happened.

To run one with Verilator, for example the top-level test:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
      rtl/p2rg_pkg.sv tb/p2rg_addsub_top_tb.sv --top-module p2rg_addsub_top_tb
    ./obj_dir/Vp2rg_addsub_top_tb

To lint a module, for example the top:

    verilator --lint-only -Wall -Irtl rtl/p2rg_pkg.sv rtl/p2rg_addsub_top.sv

The testbenches declare their own time unit. `--timescale` gives the RTL
modules, which declare none, the same unit. Every test finishes in well
under a second.
