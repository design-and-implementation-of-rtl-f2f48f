# Reversible-logic combinational circuits

A conventional logic gate loses information: from the output of an AND gate you cannot
tell which inputs produced it, and each lost bit carries a minimum energy cost. A
*reversible* gate has as many outputs as inputs and maps them one-to-one, so nothing is
lost and the input can always be recovered from the output. This library builds the
usual combinational blocks out of such gates: a full adder, a ripple-carry adder, a
one-bit comparator, a 2:4 decoder, a 4:2 encoder, a 4:1 multiplexer and a 1:4
demultiplexer. Each one is a netlist of reversible gates.

The RTL describes the logic function of these netlists. Synthesised to ordinary
CMOS cells it is just combinational logic. What it gives you is an exact, simulable
model of each reversible circuit: which gate does what, where constants go in and
which lines come out as garbage.

## The rules every circuit here follows

Three terms recur throughout the code:

* **No fan-out.** A line may feed only one gate input. When a value is needed twice it is
  copied with a Feynman gate whose second input is 0, or passed along through a gate's
  `P` output, which always returns the gate's first input unchanged.
* **Constant inputs.** Gate inputs tied to 0 or 1 turn a general gate into the function
  needed. Examples are `D = 0` on an HNG gate to make it a full adder, and `C = 1` on a
  Fredkin gate to make it an OR.
* **Garbage outputs.** These are gate outputs the function does not need. They still come
  out of every module as `garbage` ports (or `g`, `g1`, ...), so that each circuit keeps
  its one-to-one mapping. Every testbench checks that mapping: no two input words may give
  the same output word, garbage included.

There is no clock, no reset and no state anywhere in this design. Every output follows its
inputs after the delay of its gate chain.

## The gates

All gates are in `rtl/rev_*_gate.sv`. In every gate `P = A`.

| Gate | Size | Outputs | Quantum cost |
|---|---|---|---|
| Feynman (CNOT) | 2x2 | Q = A xor B | 1 |
| Peres | 3x3 | Q = A xor B, R = AB xor C | 4 |
| Toffoli | 3x3 | Q = B, R = AB xor C | 5 |
| Fredkin | 3x3 | Q = A'B + AC, R = A'C + AB (B and C swap when A = 1) | 5 |
| HNG | 4x4 | Q = B, R = A xor B xor C, S = (A xor B)C xor AB xor D | 6 |
| M | 3x3 | Q = (A xor B)', R = AB' xor C | |
| L | 3x3 | Q = B, R = (A + B)' xor C | |
| BJN | 3x3 | Q = B, R = (A + B) xor C | 5 |
| MFRG (modified Fredkin) | 3x3 | Q = AB + A'C, R = AC + A'B (B and C swap when A = 0) | |

The quantum costs are reference figures from the literature on these gates. They are not
modelled in the RTL.

The MFRG equations are the usual published definition of this gate. The source design
names the gate but does not state its equations. The whole multiplexer depends on this
choice (see below).

## The circuits

### Full adder (`rev_full_adder`): two Peres gates

`Peres(A, B, 0)` gives `A xor B` and `AB`. `Peres(A xor B, Cin, AB)` then gives
`Sum = A xor B xor Cin` on Q and `Cout = (A xor B)Cin xor AB` on R. It uses one constant
and has two garbage lines: `g1 = A` and `g2 = A xor B`.

### Ripple-carry adder (`rev_adder_hng`): one HNG gate per bit

With `D = 0` one HNG gate is a full adder. R is the sum bit and S the carry. Bit *k* is
`HNG(a[k], b[k], carry[k], 0)`, and its S output is the C input of bit *k*+1. The carry
into bit 0 is `cin`, and the carry out of the top bit is `cout`. `garbage[2k]` and
`garbage[2k+1]` are the copies of `a[k]` and `b[k]` from P and Q. `WIDTH` defaults to 4.
The critical path is the carry chain, `WIDTH` gates long.

### One-bit comparator (`rev_comparator`): M gate, then L gate

`M(A, B, 0)` gives `eq = (A xor B)'` on Q and `gt = AB'` on R. `L(eq, gt, 0)` passes
both through and forms `lt = (eq + gt)' = A'B` on R. The only garbage is `g = A`. Exactly
one of `eq`, `gt` and `lt` is 1.

### 2:4 decoder with enable (`rev_decoder`)

With `s = 1`, output `x[{a,b}]` is 1 and the others are 0. `a` is the more significant
select bit. With `s = 0` all outputs are 0. The circuit has four gates:

```
Feynman(b, 0)        -> two copies of b
Fredkin(a, s, 0)     -> Q = a's, R = as           (the enable, steered by a)
Fredkin(b, a's, 0)   -> Q = x0,  R = x1
Fredkin(b, as, 0)    -> Q = x2,  R = x3
```

The three garbage lines are the P outputs of the Fredkin gates (copies of a, b and b).
**Departure:** the published decoder uses two Feynman and two Fredkin gates with only the
variables A, B and S on the Fredkin data inputs. That arrangement cannot form the
three-input products the truth table needs. Each output of such a Fredkin gate is a copy
or a 2:1 selection, never an AND of three signals. The truth table was taken as binding,
so the gate arrangement above is this design's own. It also has three garbage lines, not
the one the published design claims.

### 4:2 encoder (`rev_encoder`): two Fredkin gates with constant 1

A Fredkin gate with `C = 1` gives `Q = A + B`. `Fredkin(I3, I1, 1)` gives `Y0 = I1 + I3`.
`Fredkin(I3, I2, 1)` takes I3 from the first gate's P output and gives `Y1 = I2 + I3`.
`I0` is not needed and passes straight out as garbage G1. `garbage = {G4, G3, G2, G1}`.
The encoder is specified for one-hot inputs. An all-zero input gives `y = 0`, and inputs
with several bits set give the OR of their indices.

### 4:1 multiplexer (`rev_mux`): three MFRG gates

`y = i[{s1, s0}]`. The circuit has three gates:

```
MFRG(s0, i0, i1)        R = s0' i0 + s0 i1   -> third gate    Q = G1, P = s0 -> next gate
MFRG(s0, i2, i3)        R = s0' i2 + s0 i3   -> third gate    P = G2, Q = G3
MFRG(s1, m01, m23)      R = y                                 P = G4, Q = G5
```

The circuit is a permutation of its six lines: the five garbage lines are the unselected
data values and the select copies. **Departure:** the published drawing takes the data
result of the first two gates from their middle output. Under the MFRG equations used
here the selected value is on R, so R is wired on and Q becomes garbage. If your MFRG has
the data outputs the other way round, swap `q` and `r` in `rev_mfrg_gate.sv` and in the
first two instances of `rev_mux.sv`.

### 1:4 demultiplexer with enable (`rev_demux`): four Toffoli and five Peres gates

With `en = 1`, `din` appears on `y[{s0, s1}]` and the other outputs are 0. Note that `s0`
is the **more significant** select bit here. With `en = 0` all outputs are 0.

* `Peres(din, en, 0)` forms the gated data `DE = din·en`.
* Four Toffoli gates `T(S0, S1, 0)` form a chain on the two select lines. Between them,
  NOT gates invert the lines in place: S1 after gate 1, S0 after gate 2, S1 after gate 3.
  The gates therefore decode `s0 s1`, `s0 s1'`, `s0' s1'` and `s0' s1`. These are the
  minterms of y3, y2, y0 and y1, in that order along the chain.
* Four Peres gates `Peres(DE, minterm, 0)` each put `DE·minterm` on R. P hands DE on to
  the next gate.

The nine garbage lines are listed in the module header. The chain, the gate counts, the
output order along it and the nine garbage lines follow the published design. Reading its
small circle marks as in-line NOT gates is this design's interpretation. That reading is
also where the select order comes from. If you want `s1` as the MSB, swap the `s0` and
`s1` connections at the instance.

## The top level (`rev_top`)

The circuits have nothing to do with one another, so `rev_top` just places each one
beside the others and brings all their lines out under a prefix: `add_`, `fa_`, `cmp_`,
`dec_`, `enc_`, `mux_`, `dmx_`. It also places every gate once on its own.
`fg_in`/`fg_out` are `{A,B}`/`{P,Q}`, and `hng_in`/`hng_out` are `{A,B,C,D}`/`{P,Q,R,S}`.
The seven 3x3 gates use the packed structs `rev3_in_t {a,b,c}` and `rev3_out_t {p,q,r}`
from `rev_pkg`. Its one parameter is `ADDER_WIDTH`, which defaults to 4.

## What is not here

* **Full subtractor:** one is named alongside the other circuits, but no circuit or truth
  table for it is given. It is not built.
* **Conventional comparator:** the irreversible comparator made of NOT, AND and XNOR
  gates is only a point of comparison. It is not built.
* No FPGA mapping or power figures are reproduced. Synthesised with ordinary cells, this
  RTL is ordinary combinational logic, and any power benefit of reversibility needs
  reversible physical gates.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. It applies every input
combination, compares the outputs with an independent reference (arithmetic, a truth
table, or the gate rule written differently), and checks that the mapping is one-to-one.
It prints `TB_RESULT checks=N failures=M`. A time-based watchdog ends a hung run as a
failure.

`tb/tb_rev_top.sv` drives the whole top at its default parameters. Each circuit gets
every one of its input combinations, and every output is checked, garbage lines included.
The testbench also counts how often each behaviour occurs and fails if one never does:
adder carry out and a carry rippling through all four stages, each comparator result,
decoder and demultiplexer disabled and each of their outputs selected, each encoder code,
each multiplexer input, and the Fredkin and MFRG swap cases.

Each testbench was also run against a copy of its module with one deliberate fault, and
every one of those copies was caught. Run any testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl --top-module tb_rev_top \
    rtl/rev_pkg.sv tb/tb_rev_top.sv -y rtl
./obj_dir/Vtb_rev_top
```

To build another width of adder, set `ADDER_WIDTH` on `rev_top` or `WIDTH` on
`rev_adder_hng`. The adder testbench is exhaustive, so its run time doubles with each
extra bit of width.
