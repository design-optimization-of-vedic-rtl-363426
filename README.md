# A 4x4 Vedic multiplier in reversible logic

This is an unsigned 4-bit by 4-bit multiplier. It gives an 8-bit product and is built only from
reversible gates. Each gate maps its n inputs one-to-one onto n outputs, so no information is
erased. That is the property reversible and quantum circuit styles need. The multiplication
follows the Urdhva Tiryakbhyam ("vertically and crosswise") method of Vedic arithmetic:

- split each operand into halves;
- multiply the halves vertically (low by low, high by high) and crosswise (low by high);
- add the sub-products at their place values.

The design aims to be cheap in reversible-logic terms. The whole multiplier uses:

| figure of merit | value |
|---|---|
| gates | 31 |
| constant (ancilla) inputs | 31 |
| garbage outputs | 38 |
| quantum cost | 150 |
| TRLIC (sum of the four above) | 250 |

The RTL is ordinary synthesizable SystemVerilog. Each reversible gate is a small combinational
module, and the multiplier is a netlist of those gates. So it simulates and synthesizes like any
CMOS logic, but its structure is exactly the reversible circuit.

## The four gates

| module | size | function (P, Q, ...) | quantum cost | used as |
|---|---|---|---|---|
| `feynman_gate` | 2x2 | (A, A^B) | 1 | copy or XOR |
| `peres_gate` | 3x3 | (A, A^B, AB^C) | 4 | half adder with C=0 (`peres_ha`) |
| `hng_gate` | 4x4 | (A, B, A^B^C, (A^B)C ^ AB ^ D) | 6 | full adder with D=0 |
| `bvppg_gate` | 5x5 | (A, B, AB^C, D, AD^E) | 10 | two partial products with C=E=0 |

A constant input is tied to `1'b0` inside the module that uses the gate. A gate output that the
circuit does not need is a *garbage* output. Garbage outputs are not left open: each module
brings them out on a `garbage` port. This keeps the full n-to-n mapping visible at every level.

## The 2x2 multiplier (`vedic2x2_rev`)

For a = a1a0 and b = b1b0, the product bits are:

```
q0 = a0 b0
q1 = a1 b0 ^ a0 b1
q2 = (a0 a1 b0 b1) ^ a1 b1
q3 = a0 a1 b0 b1
```

Five gates produce them. Every signal, primary inputs included, drives exactly one gate input:

```
BVPPG(a0, b0, 0, b1, 0) -> garbage, b0', q0 = a0b0, b1', a0b1
PG(a1, b0', 0)          -> a1', garbage, a1b0
PG(a1', b1', 0)         -> garbage, garbage, a1b1
PG(a0b1, a1b0, 0)       -> garbage, q1, a0a1b0b1
FG(a0a1b0b1, a1b1)      -> q3, q2
```

The primed signals are copies that a gate passes on unchanged. This gives reversible fan-out
without a separate copy gate. Cost: 5 gates, 5 constants, 5 garbage bits, quantum cost 23,
TRLIC 38.

## The 4x4 adder network (`vedic4x4_rev`)

This is the part that needs care. Four 2x2 multipliers form four 4-bit sub-products:

```
I = a[1:0] * b[1:0]      J = a[3:2] * b[1:0]
K = a[1:0] * b[3:2]      L = a[3:2] * b[3:2]
a * b = I + 4*(J + K) + 16*L
```

These are summed with as few adder cells as possible:

```
R1 R0             = I1 I0                          (no addition needed)
c1, r3..r0        = J + K                          4-bit ripple-carry adder
c2, R5..R2        = r3..r0 + {L1 L0 I3 I2}         4-bit ripple-carry adder
hc, hs            = c1 + c2                        Peres half adder
c_last, R7 R6     = {L3 L2} + {hc hs}              2-bit ripple-carry adder
```

The trick is the operand `{L1 L0 I3 I2}`. The high half of I and the low half of L do not
overlap in place value, so they are simply placed side by side. That saves an adder. The two
carries c1 and c2 both weigh 64, and their sum is added to the top half of L.

Each ripple-carry adder has a zero carry-in. So bit 0 is a Peres half adder and the other bits
are HNG full adders:

- `rca4_rev`: 1 Peres + 3 HNG gates;
- `rca2_rev`: 1 Peres + 1 HNG gate.

An earlier reversible arrangement fed the sub-products into two 4-bit adders and a 5-bit adder
at the wrong place values. It was only right while one operand's upper half was zero, so it was
really a 4x2 multiplier. The network above is exact for all 256 operand pairs, and the testbench
checks every one.

Properties that follow from the arithmetic, and that the testbench confirms:

- **`c_last` is always 0.** The largest product, 225, fits in 8 bits. The carry of the last
  adder is never part of the product. It comes out on its own port and is not counted as
  garbage.
- **The half adder never carries.** The first adder carries only for J = K = 9, that is
  a = b = 15. Then r3..r0 = 2 and the second adder cannot carry. So `hc` is always 0, but the
  half adder still passes single carries upward (`hs`).

## Cost accounting (`rev_pkg`)

`rev_pkg` holds the per-gate quantum costs and a `rev_cost_t` struct (gates, constants, garbage,
quantum cost). Each block's totals are built from its gate instances:

| block | gates | constants | garbage | quantum cost |
|---|---|---|---|---|
| 2x2 multiplier | 5 | 5 | 5 | 23 |
| 4-bit ripple-carry adder | 4 | 4 | 7 | 22 |
| 2-bit ripple-carry adder | 2 | 2 | 3 | 10 |
| Peres half adder | 1 | 1 | 1 | 4 |
| **4x4 = 4 x 2x2 + 2 x RCA4 + RCA2 + HA** | **31** | **31** | **38** | **150** |

The package is constants only; nothing in it is synthesized. The `garbage` port of
`vedic4x4_rev` is 38 bits wide. The 2x2 multipliers fill bits 0-19: I, J, K, L, 5 bits each.
Then come the first 4-bit adder (7 bits), the second 4-bit adder (7), the half adder (1) and the
2-bit adder (3).

## Where this departs from, or adds to, the published design

- **Operand fan-out at the 4x4 level.** Reversible rules allow each signal to drive one input
  only. Yet each 2-bit operand half feeds two 2x2 multipliers, and the 31-gate total leaves no
  room for copy gates. The RTL follows the 31-gate structure, so each operand bit drives two
  gate inputs. A strictly fan-out-free version would need 8 more Feynman gates: 8 more gates,
  8 more constants and quantum cost +8.
- **Feynman gate outputs in the 2x2 multiplier.** They are assigned so that q2 and q3 meet the
  equations above: q3 is the gate's pass-through output, q2 its XOR output.
- **Choices made here:** the ports, the garbage bit order and the `c_last` port.
- **No timing model.** The design is purely combinational, and no delay or clock is modelled.
- **Not included:** the conventional AND/XOR 2x2 multiplier. The reversible 2x2 is derived from
  it, but only as a reference.

## Files

| file | contents |
|---|---|
| `rtl/rev_pkg.sv` | cost struct, per-gate quantum costs, block totals |
| `rtl/feynman_gate.sv` | Feynman gate |
| `rtl/peres_gate.sv` | Peres gate |
| `rtl/hng_gate.sv` | HNG gate |
| `rtl/bvppg_gate.sv` | BVPPG gate |
| `rtl/peres_ha.sv` | Peres half adder |
| `rtl/rca4_rev.sv` | 4-bit ripple-carry adder |
| `rtl/rca2_rev.sv` | 2-bit ripple-carry adder |
| `rtl/vedic2x2_rev.sv` | 2x2 multiplier |
| `rtl/vedic4x4_rev.sv` | 4x4 multiplier, the top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Top-level interface: `a[3:0]`, `b[3:0]` in; `r[7:0]` product, `c_last` and `garbage[37:0]` out.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. What they check:

- **Gates:** every input pattern against an arithmetic reference, plus a check that no two
  inputs give the same output pattern, which shows the gate is reversible.
- **Adders:** every operand pair against the integer sum.
- **2x2 multiplier:** every operand pair, plus the check that the 9 output bits `{q, garbage}`
  are distinct for all 16 inputs.
- **4x4 multiplier (`tb_vedic4x4_rev`):** runs the top with its default (and only) configuration.
  - the eight published test products (15*15=225, 14*7=98, 10*3=30, 11*6=66, 9*12=108, 7*7=49,
    6*5=30, 4*0=0);
  - all 256 operand pairs, with `c_last` = 0 each time;
  - the 46 output bits `{r, garbage}` distinct for all 256 inputs, so no input information is
    lost;
  - the cost totals in `rev_pkg` against 31/31/38/150/250;
  - how often each adder carries and how often the half adder passes a carry, with a check that
    each occurs and that `hc` never does.

Each testbench was also run against a deliberately broken copy of its module, and each one
failed.

To simulate with Verilator, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/rev_pkg.sv \
    tb/tb_vedic4x4_rev.sv --top-module tb_vedic4x4_rev -o sim
./obj_dir/sim
```
