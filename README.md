# Wallace-tree thermometer-to-binary encoder for a flash ADC

A flash ADC compares its input against 2^N − 1 reference voltages at once.
The comparator outputs form a *thermometer code*: ones up to the input level,
zeros above it. An encoder must turn that code into an N-bit binary number.

This encoder does not look for the place where the ones turn into zeros. It
**counts the ones**. For a clean code, the count is the conversion result. A
comparator that fires wrongly leaves a *bubble*: a hole among the ones, or a
stray one above them. A bubble moves the count by exactly one code. An encoder
that decodes the 1-to-0 transition can instead jump by half of full scale.
The bubble suppression therefore covers the whole word and needs no local
correction gates.

The counter is a Wallace tree built from one-bit full adders only. For the
default 15:4 encoder (N = 4) it has 11 adders. In general it has
2^N − N − 1 adders. Each adder is a small hybrid cell made of two XORs and one
multiplexer. In silicon that cell takes 10 transistors, so the whole 15:4
encoder takes 110.

## Files

| file | module | what it is |
|---|---|---|
| `rtl/wallace_encoder.sv` | `wallace_encoder #(N=4)` | the (2^N−1):N encoder, top of the design |
| `rtl/hybrid_full_adder.sv` | `hybrid_full_adder` | one-bit full adder made of the three cells below |
| `rtl/gdi_xor.sv` | `gdi_xor` | cell T1: p = a ⊕ b |
| `rtl/ptl_xor.sv` | `ptl_xor` | cell T2: sum = p ⊕ cin |
| `rtl/ptl_mux.sv` | `ptl_mux` | cell T3: carry = p ? cin : a |
| `tb/*_tb.sv` | | self-checking testbenches, one per module, plus `wallace_encoder_sizes_tb` |
| `tb/flash_frontend_model.sv` | | behavioural resistor ladder and comparators, with bubble injection (testbench only) |
| `tb/wallace_size_check.sv` | | helper that checks one encoder size |

The whole design is combinational. There is no clock, no reset and no
register.

## The full adder

The adder is split into three cells, as in the transistor circuit it models:

```
          ┌──────────┐  p = a^b
 a ──┬───►│ T1  XOR  ├────┬──────────────┐
 b ──┼───►│          │    │              │ sel
     │    └──────────┘    ▼              ▼
     │              ┌──────────┐   ┌──────────┐
 cin ┼─────────────►│ T2  XOR  │   │ T3  MUX  │
     │              └────┬─────┘   │ d0 = a   │
     │                   ▼         │ d1 = cin ├──► carry
     │                  sum        └──────────┘
     └───────────────────────────────► (a to d0, cin to d1)
```

When a and b differ (p = 1), the carry equals cin. When they are equal, the
carry equals a (which is also b). In the silicon version, T1 is a
gate-diffusion-input XOR, T2 is a pass-transistor XOR and T3 is a
pass-transistor multiplexer. At register-transfer level each cell is just its
logic function. Transistor sizing, voltage swing and area are not modelled.

The published circuit shows A, Cin and T1's output running into T3, but it
does not mark which of them is the select. Using p as the select is this
design's choice. It is the only wiring of those three signals that gives a
full-adder carry.

## The tree

A (2^N−1)-input ones counter splits into three parts:

* a counter of the lower 2^(N−1) − 1 inputs;
* a counter of the next 2^(N−1) − 1 inputs;
* one leftover input, the top bit.

The two (N−1)-bit partial counts are added by an (N−1)-bit ripple-carry adder.
The leftover bit enters that adder as its carry-in. Unrolled down to N = 2,
where a single full adder counts three bits, this gives the 15:4 netlist
(inputs are `i1`..`i15`, with `therm_i[k-1]` = `ik`):

```
 level 2 (3:2)        level 3 (7:3, 2-bit ripple)      level 4 (15:4, 3-bit ripple)
 FA(i13,i12,i11) ─┐
                  ├─ FA(i14, s, s) → FA(c, c, c) ─┐
 FA(i10,i9,i8)  ──┘     carry-in i14              │
                                                  ├─ FA(i15,s,s) → FA(.,.,.) → FA(.,.,.) → bin_o[3:0]
 FA(i6,i5,i4)   ──┐                               │     carry-in i15
                  ├─ FA(i7, s, s)  → FA(c, c, c) ─┘
 FA(i3,i2,i1)   ──┘     carry-in i7
```

Adder count: F(N) = 2·F(N−1) + (N−1), with F(2) = 1. This gives 1, 4, 11,
26 and 57 adders for N = 2 to 6, which is 2^N − N − 1.

The RTL builds this tree with nested `generate` loops over levels and nodes,
not by instantiating itself recursively:

* Node `j` of level `L` produces an L-bit count.
* Every count lives in one flat vector `cnt`, at offset `cnt_off(L) + j*L`.
* `node_start(L, j)` is the index of the node's lowest input. Its leftover
  input is at `node_start + 2^L − 2`.

Both functions are constant functions in the module. Synthesis of the default
size gives exactly 22 XOR and 11 MUX cells.

The adder input order (which signal goes to `a`, `b` or `cin`) follows the
top-to-bottom order of the reference block diagram. The full adder is
symmetric, so the order does not change the function.

### Output bit order

`bin_o` is a plain binary number: `bin_o[0]` has weight 1 and `bin_o[N-1]`
is the carry of the last ripple adder. The reference drawings label the
outputs b3, b2, b1, b0 without weights:

* When traced, their b3 and b2 are the weight-1 and weight-2 sums.
* The two drawings disagree on which of b1/b0 is the last adder's carry.

This design exposes the arithmetic order instead. Remap the bits if you need
the drawing's labels.

### Timing

Every input passes through the same number of first-level adders, except the
leftover bits (i7, i14, i15), which join later. A schematic may put
delay-matching buffers on those paths. At this level they would be wires, so
they are left out. The worst path is N − 2 levels of merging plus the N − 1
carry stages of the final ripple adder. The design has no pipeline registers.
Pipelining is the obvious way to raise the sample rate, but it is not part of
this design.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
has a watchdog.

* `gdi_xor_tb`, `ptl_xor_tb`, `ptl_mux_tb` and `hybrid_full_adder_tb` try
  every input combination.
* `wallace_encoder_tb` runs the default 15:4 encoder from end to end, in five
  phases:
  * all 2^15 input words, each compared with a bit-by-bit ones count;
  * a voltage ramp through `flash_frontend_model` (ideal ladder and
    comparators, VREF = 1 V), compared with floor(16·vin/VREF);
  * inputs over range and under range;
  * every single-comparator bubble at every level. Each must give the ones
    count and stay within one code of the true level.

  It also counts how often a transition-detecting decode would have erred by
  more than one code: 105 of the 210 true bubbles. It fails if any of these
  phases never occurs.
* `wallace_encoder_sizes_tb` checks N = 2 and N = 3 exhaustively. For N = 5
  and N = 6 it uses clean codes, single-bubble codes and 20 000 random words.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module wallace_encoder_tb tb/wallace_encoder_tb.sv -o sim
./obj_dir/sim
```

Each testbench finishes in well under a second.

## Changing it

* Set `N` for another resolution (N ≥ 2). The encoder is (2^N−1):N. Nothing
  else needs to change.
* To pipeline the encoder, register `cnt` between levels inside the level loop
  of `wallace_encoder`. Also delay the leftover input bits, which feed the
  same level.
* The testbenches compute their expected values independently of the RTL, so
  they stay valid for any implementation of the cells.

## Limits and departures

* Only the digital encoder is RTL. The resistor ladder and the comparators of
  the ADC exist only as an ideal behavioural model for simulation.
* The full adder and its cells are modelled by logic function. The
  area and power advantages of the 10-transistor cell are properties of the
  custom transistor circuit. Nothing here reproduces them.
* The choice of select signal for the carry multiplexer and the output bit
  order are this design's own readings. See the two sections above.
