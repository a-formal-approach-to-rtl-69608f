# Galois-field arithmetic circuits: GF(2^m) parallel multiplier, GF(2^8) inverter, GF(3) adder

Arithmetic over finite fields (Galois fields) sits at the core of error-correcting
codes and cryptography. This RTL implements three such circuits. Each is described
as a hierarchy of small field circuits, and every node of the hierarchy obeys one
short field equation:

| circuit | equation | default field |
|---|---|---|
| `gf2m_mul`, parallel multiplier | z = x·y mod IP | GF(2^128) |
| `gf2m_inv`, inverter | y = x^(2^m − 2) | GF(2^8), AES polynomial |
| `gf3_add`, adder over a prime field | z = x + y mod 3 | GF(3), 2-bit binary code |

The multiplier is the main circuit. It is written so that its structure is the
equations: a partial product generator whose row i computes `x·y_i·β^i mod IP`, an
accumulator that adds the rows, GF(2^m) adders made of GF(2) adders (XOR), and GF(2)
multipliers (AND). Each level can be checked against the level below it by algebra
alone, without enumerating input vectors. That is the point of the structure: a
GF(2^128) multiplier has 2^256 input pairs, far too many to simulate.

`gf_top` places the three circuits side by side with separate ports. They share
nothing. All logic is combinational. There is no clock, no reset and no handshake:
an output is valid one propagation delay after its inputs.

## Field elements and polynomials

An element of GF(2^m) is a polynomial of degree below m with coefficients in
{0, 1}, written in the basis (β^(m−1), …, β^1, β^0). On a bus, bit i carries the
coefficient of β^i. Arithmetic is done modulo an irreducible polynomial
`IP = β^m + a_(m−1)β^(m−1) + … + a_0`. A parameter of type `gf_pkg::poly_t`
(`logic [128:0]`) stores IP with bit i = a_i and bit m set.

* Addition is bitwise XOR. It does not depend on IP.
* Multiplication is polynomial multiplication followed by reduction modulo IP.
  Reduction uses β^m = a_(m−1)β^(m−1) + … + a_0.

Default polynomials come from `gf_pkg::typical_ip(m)`:

| m | IP | origin |
|---|---|---|
| 2 | β^2+β+1 | the small worked example of the multiplier |
| 4 | β^4+β+1 | common choice |
| 8 | β^8+β^4+β^3+β+1 | AES field (the inverter is meant for AES) |
| 16 | β^16+β^5+β^3+β+1 | common choice |
| 31 | β^31+β^3+1 | first of the ten GF(2^31) polynomials exercised |
| 32 | β^32+β^7+β^3+β^2+1 | common choice |
| 64 | β^64+β^4+β^3+β+1 | common choice |
| 128 | β^128+β^7+β^2+β+1 | common choice (the GCM polynomial) |

The multiplier family was designed with "typical" polynomials for these degrees.
The specific polynomials for m = 4, 16, 32, 64 and 128 were not given, so these are
this implementation's picks. Any other polynomial of degree m can be passed as `IP`.
Irreducibility is not checked: with a reducible IP the circuit still computes
x·y mod IP, but that is no longer a field. `gf2m_mul` stops elaboration when IP does
not have degree exactly M or has no constant term.

## The parallel multiplier (`gf2m_mul`)

```
 x ──┬──────────┬───────── … ──────────┐
     │          │                      │
 y0─PPG_0   y1─PPG_1       …   y(m-1)─PPG_(m-1)      gf2m_ppg (m rows)
     │t0        │t1                    │t(m-1)
     └──GFA─────┘                      │
          └──────GFA── … ──────────GFA─┘              gf2m_acc (m-1 GFAs)
                                         └── z = x·y mod IP
```

Since y = Σ y_i β^i, the product is x·y = Σ_i x·(y_i β^i). Row i of the partial
product generator (`gf2m_ppg_row`) computes one term, and the accumulator
(`gf2m_acc`) adds the m terms.

### A partial product row

Row i sees all of x and one bit y_i. It works in two steps:

1. m GF(2) multipliers (`gf2_mul`) form `a_k = x_k · y_i`.
2. Each a_k belongs to β^(k+i). If k+i < m it goes straight to output bit k+i.
   Otherwise β^(k+i) is replaced by its remainder mod IP, and a_k is added (XOR)
   into every bit position where that remainder has a 1.

Output bit j of row i is therefore the XOR of a fixed set of a_k. The set is decided
at elaboration time, so the row is a fixed AND/XOR network. Row 0 needs no
reduction and is just `x & {m{y_0}}`.

Worked example, GF(2^2) with IP = β^2+β+1, row 1: a_0 = x_0y_1 belongs to β^1 and
a_1 = x_1y_1 belongs to β^2 = β+1. So t_1 = (a_0 ⊕ a_1)·β + a_1: two AND gates and
one XOR.

### The reduction table

The only remainders a product can need are those of β^m … β^(2m−2). The package
function `gf_pkg::high_cols(m, IP)` computes them once, by repeated
multiply-by-β, and stores them transposed: bit e of `HC[j]` is the coefficient of
β^j in β^(m+e) mod IP. `gf2m_ppg` computes this table once and hands it to every
row as the parameter `HC`. In row I, output bit j then takes the XOR of `a & mask`,
where

```
mask = (j >= I ? 1 << (j-I) : 0)          // the unreduced term a_(j-I)
     | (HC[j] << (m - I))[m-1:0]          // a_k with k >= m-I, via beta^(k+I) mod IP
```

The second line works because bit k of `HC[j] << (m−I)` is `HC[j][k+I−m]`. That
bit is exactly "β^(k+I) mod IP has a 1 at β^j". Computing the table once per
multiplier rather than once per row saves a factor of m in elaboration work,
which is noticeable at m = 128.

### The accumulator

`gf2m_acc` adds the m rows with m−1 GF(2^m) adders (`gf2m_add`, each m `gf2_add`
XORs) in a linear chain: `s_i = s_(i−1) + t_i`. This is the plain extension of the
two-row example. It is also the deepest possible arrangement: at m = 128 a bit
passes through up to 127 XORs. A balanced adder tree gives the same function with
depth ⌈log2 m⌉. If the circuit is to be timed, that is the first thing to change.
Synthesis also tends to rebalance XOR chains.

### Size

At m = 128, a generic yosys synthesis of `gf_top` (the multiplier plus the small
inverter and adder) gives about 50 k word-level cells:
16 768 AND, 16 595 XOR, 16 384 128-input XOR reductions (the row masks, most of
them sparse) and 440 small reductions. It has no flip-flops.

## The inverter (`gf2m_inv`)

For x ≠ 0, x^(2^m − 1) = 1, so x^(2^m − 2) = x^−1. The exponent is
2 + 4 + … + 2^(m−1), so

```
y = x^2 · x^4 · … · x^(2^(m-1))
```

A chain of m−1 squarers (`gf2m_sqr`) produces x^2, x^4, …, and a chain of m−2
parallel multipliers (`gf2m_mul`) multiplies them together. In GF(2^8) this is
7 squarers and 6 multipliers. x = 0 gives y = 0, the usual convention (AES S-box).

Squaring over GF(2) is linear: x^2 = Σ x_k β^(2k). `gf2m_sqr` is therefore an XOR
network only. Bit x_k goes to bit 2k when 2k < m, and otherwise to the positions
of β^(2k) mod IP, read from the same `high_cols` table.

The chain arrangement of squarers and multipliers is this implementation's choice.
The only requirements were the exponent and the count of 7 + 6 parts. The depth is
7 squarers plus 6 multipliers in series. An addition chain or a tree would be
shallower.

## The GF(3) adder (`gf3_add`)

A GF(3) value travels on two wires {L1, L0}: 0 → 00, 1 → 01, 2 → 10. Code 11 is
unused, and an immediate assertion reports it if it ever arrives. The adder is a
fixed network of four OR and three XOR gates:

```
w0 = x_L1 | y_L1    w1 = x_L1 | y_L0    w2 = x_L0 | y_L1    w3 = x_L0 | y_L0
w4 = w1 ^ w2        z_L0 = w0 ^ w4      z_L1 = w3 ^ w4
```

| x+y | 0 | 1 | 2 |
|---|---|---|---|
| **0** | 0 | 1 | 2 |
| **1** | 1 | 2 | 0 |
| **2** | 2 | 0 | 1 |

All nine pairs have been checked to give the table above.

## Files

| file | content |
|---|---|
| `rtl/gf_pkg.sv` | `poly_t`, default polynomials, reduction-table function |
| `rtl/gf2_mul.sv`, `rtl/gf2_add.sv` | GF(2) multiplier (AND) and adder (XOR) |
| `rtl/gf2m_add.sv` | GF(2^m) adder, m GF(2) adders |
| `rtl/gf2m_ppg_row.sv`, `rtl/gf2m_ppg.sv` | one partial-product row; all m rows |
| `rtl/gf2m_acc.sv` | accumulator, chain of GF(2^m) adders |
| `rtl/gf2m_mul.sv` | parallel multiplier |
| `rtl/gf2m_sqr.sv`, `rtl/gf2m_inv.sv` | squarer; inverter |
| `rtl/gf3_add.sv` | GF(3) adder |
| `rtl/gf_top.sv` | the three circuits side by side |
| `tb/gf_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_gf2m_mul_fields` |

Parameters: `M` (degree) and `IP` (polynomial) on every GF(2^m) module; `I` (row
index) and `HC` (reduction table, normally left at its default) on
`gf2m_ppg_row`; `N` (number of addends) on `gf2m_acc`. `gf_top` has `MUL_M`,
`MUL_IP`, `INV_M`, `INV_IP`. `gf_pkg::MAX_DEG` (128) bounds M. Raise it to build
larger fields.

## Verification

Every testbench compares against `gf_ref_pkg::ref_mul`. This is a bit-serial
(Horner) multiply-and-reduce that shares no structure with the parallel circuit.
Each testbench prints `TB_RESULT checks=N failures=F`.

* `tb_gf2m_mul`: every operand pair in GF(2^2), GF(2^4) and GF(2^8), plus 2 000
  random and corner pairs in GF(2^128), including β^127·β = β^7+β^2+β+1.
* `tb_gf2m_mul_fields`: multipliers for m = 4, 8, 16, 32, 64, 128. Also GF(2^31)
  under ten polynomials: the trinomials β^31+β^k+1 (k = 3, 6, 7, 13) and the
  pentanomials β^31+β^23+β^15+β^7+1, β^31+β^25+β^19+β^13+1,
  β^31+β^3+β^2+β+1, β^31+β^6+β^4+β^2+1, β^31+β^13+β^8+β^3+1 and
  β^31+β^15+β^14+β^13+1. Each runs 300 random vectors.
* `tb_gf2m_ppg`, `tb_gf2m_ppg_row`: each row against x·(y_iβ^i), and the row sum
  against x·y. GF(2^8) is checked exhaustively; GF(2^128) uses random operands,
  with rows 0, 100 and 127 tested separately.
* `tb_gf2m_acc`, `tb_gf2m_add`, `tb_gf2_add`, `tb_gf2_mul`: the sums against a
  per-coefficient parity.
* `tb_gf2m_sqr`: squares against x·x (all of GF(2^8), random in GF(2^31) and
  GF(2^128)).
* `tb_gf2m_inv`: all inputs of GF(2^8) and GF(2^4) satisfy x·y = 1, and inv(0) = 0.
  0x53 and 0xCA are each other's inverse in the AES field.
* `tb_gf3_add`: the nine pairs.
* `tb_gf_top`: the whole design at its default parameters. It checks 1 000
  GF(2^128) products and every GF(2^8) inverse, also fed back through the big
  multiplier. It checks the GF(3) table too. It counts that products needing
  reduction and products not needing it, inv(0) and nonzero inverses, and GF(3)
  sums with and without wrap-around all occurred.

Running one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_gf_top \
    rtl/gf_pkg.sv tb/gf_ref_pkg.sv tb/tb_gf_top.sv
./obj_dir/Vtb_gf_top
```

Verilator finds the other modules through `-Irtl` (one module per file, named
after the file). Builds with a GF(2^128) multiplier take one to three minutes.
Simulation takes seconds.

Not verified here: timing, and any synthesis beyond a generic yosys run.
Irreducibility of the default polynomials is standard knowledge but is not
re-checked by the RTL.

## Choices made in this implementation

* All blocks are combinational, with no pipeline registers. The circuits were
  specified as parallel (one-shot) operators with no clocking.
* The reduction adders inside a row are written as masked XOR reductions, not as
  separate `gf2_add` instances. The function is the same, with fewer instances.
  The AND gates and the GF(2^m) adders are explicit `gf2_mul` / `gf2_add`
  instances.
* The accumulator and the inverter use linear chains (see above).
* The default polynomials for m = 4, 16, 32, 64 and 128 are this implementation's
  picks (see the polynomial table).
* The GF(3) assertion on the unused code 11 is an addition.
