# Tower-field AES S-box with SAT-optimised GF(2^4) inverters

The AES S-box maps a byte `U` to `R = M·U⁻¹ + 0x63`. `U⁻¹` is the inverse in GF(2^8)
(polynomial x^8+x^4+x^3+x+1, with 0 mapped to 0), `M` is the fixed 8×8 affine matrix and
0x63 the affine constant. A lookup table is large. Small hardware S-boxes instead compute the
inverse in a *tower field*: GF(2^8) is rebuilt as GF(((2^2)^2)^2), so the only hard step
left is an inverse in GF(2^4), a 4-input, 4-output function. Everything else is either
linear (XOR networks) or a handful of AND gates.

This RTL implements that S-box in the shape used for area and delay optimisation. The
datapath is split into five functions, each small enough to be optimised on its own:

```
 U ─► TL0 ─┬─► Mul-Sum ─► GF(2^4) inverse ─► 2Mul ─► BL0 ─► R
  8    18  │     4            4          ▲   18     8
           └─────────────────────────────┘
```

| stage | in → out | kind | what it computes |
|---|---|---|---|
| TL0 (`tl0_matrix`) | 8 → 18 | linear | map into the tower, then expand both GF(16) halves for the multipliers |
| Mul-Sum (`mul_sum`) | 18 → 4 | 9 NAND + XOR | `d = g1·g0 + ν·(g1+g0)²` |
| inverse (`gf16_inv_nb_area` / `gf16_inv_nb_fast`) | 4 → 4 | gate netlist | `θ = d⁻¹` in GF(16) |
| 2Mul (`mul2`) | 4 + 18 → 18 | 18 AND | partial products of `θ·g1` and `θ·g0` |
| BL0 (`bl0_matrix`) | 18 → 8 | linear + 0x63 | fold the products, map back, apply `M`, add 0x63 |

The two GF(2^4) inverters are the heart of the design. Each is a fixed netlist of standard
cells, found by an exact SAT search over a cell library that includes complex gates
(OA21, MAOI1, MOAI1, NMUX) rather than only 2-input gates:

* **small-area inverter**: 8 cells, reported as 15.33 GE, logic depth 3. It is used by
  the small-area S-box, which is the default.
* **low-depth inverter**: 9 cells, 19.33 GE, logic depth 2. It is used by the fast S-box.

A third SAT-optimised inverter is included as a separate block. It works on 5-bit
*redundantly represented* GF(2^4) codes and belongs to a second S-box type, GF((2^4)^2);
see [The redundant-basis inverter](#the-redundant-basis-inverter).

## The tower and its normal bases

Every level of the tower uses a normal basis, i.e. a basis of the form {β, β^q}. Written
in the AES polynomial basis, the constants are:

| level | basis | generator |
|---|---|---|
| GF(4) over GF(2) | {W², W} | W = 0xBC (order 3) |
| GF(16) over GF(4) | {Z⁴, Z} | Z = 0xE0 |
| GF(256) over GF(16) | {Y¹⁶, Y} | Y = 0x12, with Y + Y¹⁶ = 1 |

A 4-bit GF(16) code `{a3,a2,a1,a0}` stands for `a3·Z⁴W² + a2·Z⁴W + a1·ZW² + a0·ZW`.
An 8-bit tower code `{g1,g0}` stands for `g1·Y¹⁶ + g0·Y`.

These generators were chosen so that, under the cell netlists' bit order, the GF(16)
inverse is exactly this table:

```
x    : 0  1  2  3  4  5  6  7  8  9 10 11 12 13 14 15
x^-1 : 0 12  8  4  3 10  7  6  2 13  5 14  1  9 11 15
```

Any other choice would need different inverter netlists.

### Inversion in GF(256)

With trace `Y + Y¹⁶ = 1` and norm `ν = Y·Y¹⁶`, the inverse of `A = g1·Y¹⁶ + g0·Y` is:

```
d     = g1·g0 + ν·(g1 + g0)²        (Mul-Sum)
θ     = d⁻¹                         (GF(16) inverter)
A⁻¹   = (θ·g0)·Y¹⁶ + (θ·g1)·Y       (2Mul, then BL0)
```

The result halves are swapped: `θ·g1` becomes the low half. In this basis ν has the code
`4'b0001`. `d` is zero only for `A = 0`, and the inverter maps 0 to 0, so the S-box gives
`S(0) = 0x63` without any special case.

### Multiplying with 9 AND gates

A GF(16) product is computed in two Karatsuba levels: GF(16) over GF(4), then GF(4) over
GF(2). Each operand is first expanded into 9 bits (`aes_sbox_pkg::expand16`):

```
{a3, a2, a3^a2, a1, a0, a1^a0, a3^a1, a2^a0, a3^a2^a1^a0}     (bit 0 first)
```

The product is then the bitwise AND of the two expansions, followed by a fixed XOR fold
`RED_ROWS`. The expansion is linear, so the expansions of `g1` and `g0` are folded into
TL0. The fold is linear too, so it is folded into BL0. This gives the 18-bit interfaces:

* `tl[8:0]` is the expansion of `g1` and `tl[17:9]` is the expansion of `g0`.
* The raw code bits of each half sit at expansion positions 0, 1, 3 and 4.
* `m[8:0]` are the partial products of `θ·g1` and `m[17:9]` those of `θ·g0`.

### The constant matrices

`aes_sbox_pkg` holds four matrices. Row k of each is a bit mask: output bit k is the XOR
of the masked input bits.

* `TL0_ROWS` (18 rows of 8 bits) is `expand16` applied to the isomorphism from the AES
  field into the tower.
* `BL0_ROWS` (8 rows of 18 bits) is `M · (tower → AES) · (RED_ROWS on each half, halves
  swapped)`.
* `RED_ROWS` (4 rows of 9 bits) folds the 9 AND terms into a GF(16) product.
* `SQSC_ROWS` (4 rows of 4 bits) is the linear map `x ↦ ν·x²`.

Each matrix is the unique solution of its definition over GF(2). To move to another basis,
recompute all four from the definitions above. The inverter netlists must also match the
new basis's GF(16) inverse table.

## The GF(2^4) inverter netlists

Bit order: `x = {X0,X1,X2,X3}` and `y = {Y0,Y1,Y2,Y3}`, with X0 and Y0 most significant.
Cell functions (`rtl/cell_*.sv`):

| cell | function | GE |
|---|---|---|
| NAND2, NOR2, XNOR2, XOR2 | usual | 1.00, 1.00, 2.00, 2.00 |
| OA21(a,b,c) | ~((a\|b)&c) | 1.33 |
| MAOI1(a,b,c,d) | ~((a&b) \| ~(c\|d)) | 2.33 |
| MOAI1(a,b,c,d) | ~(~(a&b) & (c\|d)) | 2.33 |
| NMUX(s,d1,d0) | ~(s ? d1 : d0) | 2.33 |

Small area (depth 3):

```
T0 = NOR(X1,X3)          T1 = XNOR(T0,X0)        T2 = OA21(T1,X3,X2)
T3 = MOAI1(T1,X2,T0,X2)  Y0 = MAOI1(T1,X2,X2,X3) Y1 = OA21(T0,X1,T2)
Y2 = MAOI1(X0,T3,X0,X1)  Y3 = MAOI1(T1,X3,X1,T3)
```

Low depth (depth 2):

```
T0 = NMUX(X1,X2,X0)      T1 = MOAI1(X0,X1,X2,X3) T2 = OA21(X3,X1,X0)
T3 = XNOR(X2,X3)         T4 = MOAI1(X0,X2,X1,X0)
Y0 = NMUX(T0,T3,T2)      Y1 = MOAI1(X3,T4,T0,T1) Y2 = XOR(T2,T4)
Y3 = MOAI1(T1,X1,T0,T3)
```

The NMUX operand order (select first) matters: with the select as the last operand, the
low-depth netlist is not an inverse. Each cell is its own module. A synthesis flow can
therefore keep the netlist as written (for example with a don't-touch on the cell
instances) instead of re-mapping it.

## The redundant-basis inverter

`gf16_inv_rrb` is the inverter of the GF((2^4)^2)-type S-box. There, each GF(16) element
has two 5-bit codes, a code and its bitwise complement. It has 13 cells, 23.00 GE and
depth 2 (`x = {X0..X4}`, X0 most significant):

```
T0 = OA21(X3,X2,X0)   T1 = XNOR(X3,X4)   T2 = XNOR(X1,X2)   T3 = NOR(X1,X4)
T4 = OA21(X4,X1,X0)   T5 = XOR(X2,X4)    T6 = XOR(X1,X3)
Y0 = NOR(T3, NOR(X2,X3))   Y1 = NMUX(X4,T0,T2)   Y2 = MAOI1(X3,T4,X3,T5)
Y3 = MAOI1(X2,T4,X2,T6)    Y4 = NMUX(X1,T0,T1)
```

Its function is the 32-entry table `INV_RRB_TABLE` in `tb/sbox_ref_pkg.sv`. For every
code x < 16, `f(31−x)` is the complement of `f(x)`, as the redundant code requires.

The rest of that S-box is not provided: the 8×20 top matrix, the Mul-Sum, the
multipliers and the 20×8 bottom matrix. They depend on a mixed PB/PRR/RRB basis with
multiplicative and exponential offsets, which is not specified here. The inverter
therefore sits on its own ports in the top level.

## A linear layer from local solutions: M0

`m0_matrix` is a small separate circuit. It shows how the linear layers (TL, BL) of such
S-boxes are minimised: not in one search over all outputs, but output group by output
group. Each group reuses the gates already found for the earlier groups. The example is the
8×8 matrix M0 (row k lists the inputs XORed into Yk, X0 first):

```
Y0 11001010   Y1 11001000   Y2 01100110   Y3 00011001
Y4 01101000   Y5 11110000   Y6 01000110   Y7 10100100
```

The light outputs {Y1, Y3, Y4, Y6, Y7} come first, with 9 XORs in depth 2. The remaining
{Y0, Y2, Y5} then take 4 more XORs, two of which start from Y1 and Y6:

```
T0 = X1^X4  T1 = X5^X6  T2 = X0^X2  T3 = X3^X4
Y1 = T0^X0  Y3 = T3^X7  Y4 = T0^X2  Y6 = T1^X1  Y7 = T2^X5
T4 = X1^X3  Y0 = Y1^X6  Y2 = Y6^X2  Y5 = T4^T2
```

The result is 13 XORs in depth 3. A 14-XOR, depth-2 form also exists but is not included.

## Interface and timing

`aes_sbox_top` (top level):

| port | dir | width | meaning |
|---|---|---|---|
| `sbox_in` | in | 8 | S-box input byte |
| `sbox_out` | out | 8 | `S(sbox_in)` |
| `rrb_x` | in | 5 | redundant-basis GF(16) code |
| `rrb_y` | out | 5 | its inverse |
| `m0_x` | in | 8 | input of the M0 circuit, `{X0..X7}` |
| `m0_y` | out | 8 | `M0·m0_x`, `{Y0..Y7}` |

| parameter | type | default | effect |
|---|---|---|---|
| `VARIANT` | `aes_sbox_pkg::inv_variant_e` | `INV_SMALL_AREA` | `INV_LOW_DEPTH` selects the fast S-box |

The whole design is combinational: no clock, no reset and no state. An output is valid
one propagation delay after its input changes. To use it inside a cipher, register around
it or instantiate it 16 times for a full SubBytes.

## How far it follows the published design, and where it departs

Taken over exactly:

* the five-function decomposition and its interface widths: 8→18, 18→4, 4→4, 22→18 and
  18→8;
* the three inverter netlists, gate for gate;
* the 13-XOR M0 netlist;
* the cell functions.

This design's own choices:

* **Tower basis.** The generators W, Z and Y are chosen here. Any basis that makes the
  table above the GF(16) inverse fits the inverter netlists. The TL0, BL0 and Mul-Sum
  matrices follow from that choice.
* **TL0, Mul-Sum, 2Mul, BL0.** These are written as AND gates (NAND cells in Mul-Sum) and
  masked XOR reductions,
  and synthesis builds the XOR networks. They are not hand-minimised netlists. The
  reference optimised networks have TL0 and BL0 as heuristic/SAT-minimised XOR circuits
  and Mul-Sum with NAND/NOR gates. So the area of this RTL after generic synthesis will
  not match the reported 171 GE (small area) or 215.33 GE (fast).
* **Fast variant.** It reuses the small variant's linear layers and changes only the
  inverter. The reference fast S-box also has its own lower-depth top matrix, so the
  depth of this fast variant is not the reported one.
* **No offsets.** Multiplicative offsets (`a⁻¹ = γ·(a·γ)⁻¹`) and exponential offsets
  (`a⁻¹ = ((a^(2^θ))⁻¹)^(2^(8−θ))`) are a way to search over more candidate matrices. The
  matrices here use neither. The function is the same; only the XOR counts of the linear
  layers could differ.
* **Standalone RRB inverter.** The GF((2^4)^2)-type S-box is only present through its
  inverter.

## Verification

Each block has a self-checking testbench in `tb/`. They print
`TB_RESULT checks=N failures=M` and have a watchdog. The reference model
(`tb/sbox_ref_pkg.sv`) works directly in the AES field: shift-and-add multiplication,
inversion as a^254 and the FIPS-197 affine map. Tower codes are decoded by summing basis
elements, so no testbench reuses the RTL's matrices.

| testbench | what it checks |
|---|---|
| `tb_gf16_inv_nb_area`, `tb_gf16_inv_nb_fast` | all 16 inputs against the table, and `x·x⁻¹ = 1` in the field |
| `tb_gf16_inv_rrb` | all 32 codes against the table |
| `tb_m0_matrix` | all 256 inputs against the M0 rows |
| `tb_tl0_matrix` | all 256 inputs: expansion structure, and the tower code decodes back to the input |
| `tb_mul_sum` | all 256 (g1, g0) pairs against `g1·g0 + ν(g1+g0)²` |
| `tb_mul2` | every θ with random halves |
| `tb_bl0_matrix` | 1024 random (θ, g1, g0) against `affine(θ·(g0·Y¹⁶ + g1·Y))` |
| `tb_aes_sbox_t0` | both variants, all 256 inputs, FIPS-197 spot values |
| `tb_aes_sbox_top` | top at default parameters: 256 inputs, the FIPS-197 Appendix B round-1 SubBytes state, all 32 RRB codes, all 256 M0 inputs; it requires the zero input, GF(16)-subfield inputs and complementary RRB code pairs to each occur |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/aes_sbox_pkg.sv tb/sbox_ref_pkg.sv rtl/*.sv tb/tb_aes_sbox_top.sv \
  --top-module tb_aes_sbox_top
./obj_dir/Vtb_aes_sbox_top
```

Each run finishes in well under a second.

## Files

* `rtl/aes_sbox_pkg.sv`: types, the variant enum, the constant matrices, `expand16`.
* `rtl/aes_sbox_top.sv`: top level.
* `rtl/aes_sbox_t0.sv`: the GF(((2^2)^2)^2) S-box.
* `rtl/tl0_matrix.sv`, `rtl/mul_sum.sv`, `rtl/mul2.sv`, `rtl/bl0_matrix.sv`: the
  datapath functions.
* `rtl/gf16_inv_nb_area.sv`, `rtl/gf16_inv_nb_fast.sv`, `rtl/gf16_inv_rrb.sv`: the
  inverter netlists.
* `rtl/m0_matrix.sv`: the M0 example circuit.
* `rtl/cell_*.sv`: the standard-cell functions the netlists use.
* `tb/sbox_ref_pkg.sv` and `tb/tb_*.sv`: reference model and testbenches.
