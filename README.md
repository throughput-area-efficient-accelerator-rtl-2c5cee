# Elliptic-curve point multiplier over GF(2^233)

This accelerator computes Q = d·P on a binary elliptic curve
y² + xy = x³ + a·x² + b over GF(2^233), such as NIST B-233. It is built for a
good ratio of throughput to area, which shapes three choices:

* **One arithmetic unit.** There is a single adder, a single multiplier and a
  single squarer. No operator is duplicated.
* **A one-cycle multiplier.** The field multiplier is a bit-parallel,
  three-level Karatsuba multiplier, so a full 233 × 233 product takes one cycle.
* **No separate inverter.** The two inversions at the end use Itoh–Tsujii,
  which needs only squares and products, so they run on the same multiplier and
  squarer.

The scalar multiplication uses the x-only Montgomery ladder in López–Dahab
projective coordinates. A point multiplication takes **7223 clock cycles** from
`start` to the result.

## Structure

```
             c1                                   +-------+
  ext_a ---->|\      +-----------------+ douta --->| adder |---- aout --+
  aout  ---->|/----->| dina            |    |      +-------+           |
             c2      |  dual-port RAM  |    +----->| mult  |-- mout --\|
  ext_b ---->|\      |   12 x 233      |    |      +-------+          c3 (3:1) -- dwback
  dwback --->|/----->| dinb            |----+----->(douta)-----------/|
                     +-----------------+ doutb     | squarer |- sout -/
                        ^ addra/addrb, wea/web     +---------+
                        |
             FSM control unit (ecpm_ctrl + itoh_tsujii_seq)
```

| module | role |
|---|---|
| `ecpm_top` | Top level. It wires the four parts below together. |
| `dp_ram` | True dual-port memory, 12 words × 233 bits, 4-bit addresses. |
| `routing_net` | The two 2:1 multiplexers in front of the write ports. `c1` picks what port a writes: the adder result or external data. `c2` picks what port b writes: the write-back word or external data. |
| `arith_unit` | Holds `gf_adder`, `gf_mult` and `gf_squarer`. The 3:1 multiplexer `c3` picks the word for port b: the product, `douta` unchanged, or the square. |
| `gf_mult` | `kara_mul` followed by `gf_reduce`. |
| `kara_mul` | Recursive Karatsuba polynomial multiplier. It uses `clmul_school` at the leaves. |
| `gf_squarer` | Puts a zero between every input bit, then calls `gf_reduce`. |
| `gf_reduce` | Reduces modulo f(z) = z²³³ + z⁷⁴ + 1. |
| `ecpm_ctrl` | FSM that sequences the whole computation. |
| `itoh_tsujii_seq` | Per-cycle control for one inversion. |
| `gf233_pkg` | Shared constants, the memory map, select enums and control-word structs. |

The adder and the multiplier both read `douta` and `doutb`. The squarer reads
`douta`. So one instruction can write two results in the same cycle: the
adder's result through port a, and a product or square through port b. The
post-processing uses this once.

## Field arithmetic

**Addition** is a 233-bit XOR.

**Squaring** puts a 0 after each bit, which gives a 465-bit polynomial, and
then reduces it.

**Reduction** uses z²³³ = z⁷⁴ + 1. Every set coefficient i ≥ 233 is cleared and
folded into positions i−233 and i−159. The fold runs from the top bit down, so
bits that land above 232 are folded again. The result is the same as the usual
word-wise shift-and-XOR algorithm.

**Multiplication** in `kara_mul` splits an N-bit operand into a low part of
⌈N/2⌉ bits and a high part of ⌊N/2⌋ bits. It then forms three half-size
products:

* ah·bh
* al·bl
* (ah+al)·(bh+bl)

The result is

p = al·bl ⊕ (middle ⊕ al·bl ⊕ ah·bh)·z^⌈N/2⌉ ⊕ ah·bh·z^(2⌈N/2⌉)

Each half-size product is again a `kara_mul`, with `LEVELS` one lower. With the
defaults (`N=233`, `LEVELS=3`) the split sizes are:

| level | operand sizes |
|---|---|
| 1 | 117 / 116 |
| 2 | 59 / 58 and 58 / 58 |
| 3 | 30 / 29 and 29 / 29 |

Below the third level, 27 schoolbook AND/XOR arrays of 29–30 bits do the
multiplication. The whole multiplier plus reduction is combinational. It sets
the clock period.

## Timing of the memory and instructions

Most of what is hard to follow in this design comes from the memory timing.

* **Reads are synchronous.** Each port has a single address, as in a block RAM.
  `dout` shows the word one cycle after its address was presented.
* **Forwarding.** If the word being read is written in the same cycle, `dout`
  shows the new data. This holds for a write on the same port (write-first) and
  for a write on the other port (cross-port forwarding).
* **Illegal case.** Both ports writing one address in the same cycle is illegal
  and an assertion catches it.

**Ordinary instructions take two cycles.** A port has only one address, so an
instruction needs:

1. a **read cycle**: port a gets operand 1 and port b gets operand 2;
2. an **execute cycle**: the same ports get the destination addresses. The
   results, computed from the data read in cycle 1, are written at the end of
   this cycle.

**Inversions stream one operation per cycle.** In each cycle the sequencer:

* writes the current result through port b, and
* points port a at the operand the next cycle needs.

Forwarding delivers the word being written in that same cycle. Only the first
operand needs a separate fetch cycle.

### Itoh–Tsujii schedule

Let β_k = a^(2^k − 1). Then a⁻¹ = (β_232)². The chain follows the bits of
232 = 11101000₂:

1, 2, 3, 6, 7, 14, 28, 29, 58, 116, 232

There are two kinds of step:

* A **doubling** step computes β_2k = (β_k)^(2^k) · β_k. It does k squares into
  a scratch word `v`, then one product into word `beta`.
* An **increment** step computes β_(k+1) = (β_k)² · a.

The last square writes the inverse. In total this is 232 squares and 10
products, one per cycle: **242 cycles**. The source word is left unchanged.

## The control program

Memory map (`gf233_pkg`):

| address | word |
|---|---|
| 0 | xp |
| 1 | yp |
| 2 | b |
| 3 | X1 |
| 4 | Z1 |
| 5 | X2 |
| 6 | Z2 |
| 7 | T1: temporary; holds y of the result at the end |
| 8 | T2: holds x of the result at the end |
| 9–11 | T3–T5: temporaries |

| phase | what happens | cycles |
|---|---|---|
| load | A `din_ext` pulse writes xp into `XP` and `X1`, and b and yp into memory. It also captures the key in the control unit. | 2 (not counted) |
| idle | The cycle that sees `start`. | 1 |
| affine → projective | Z2 = xp² together with Z1 = 1, then X2 = Z2², then X2 = X2 + b. Three instructions. | 6 |
| ladder | For key bits 230 down to 0: one cycle to test the bit, then 14 instructions of two cycles each. | 29 × 231 = 6699 |
| inversion 1 | Z1⁻¹, plus a fetch cycle. | 243 |
| recovery | 13 instructions. They give x = X1·Z1⁻¹, and also (xp + x)·[(X1 + xp·Z1)(X2 + xp·Z2) + (xp² + yp)·Z1·Z2] and xp·Z1·Z2. | 26 |
| inversion 2 | (xp·Z1·Z2)⁻¹, plus a fetch cycle. | 243 |
| recovery | y = (product above) · inverse + yp. Two instructions. | 4 |
| output | Read x. Then `done` is high for two cycles, with x and then y on `doutf`. | 1 until the first `done` |

The total is 7223 cycles from the `start` cycle to the first `done` cycle.

**Ladder step for key bit 1.** The 14 instructions are:

1. Z1 = X2·Z1
2. X1 = X1·Z2
3. T1 = X1 + Z1
4. X1 = X1·Z1
5. Z1 = T1²
6. T1 = xp·Z1
7. X1 = X1 + T1
8. Z2 = Z2²
9. T1 = Z2²
10. T1 = b·T1
11. X2 = X2²
12. Z2 = X2·Z2
13. X2 = X2²
14. X2 = X2 + T1

This is a point addition into (X1, Z1) and a point doubling of (X2, Z2). For key
bit 0 the control unit uses the same list with X1↔X2 and Z1↔Z2 exchanged. Both
branches take the same number of cycles and do the same kinds of operations.

The two inversions share one FSM state. A flag (`inv1`) records whether the
first one is done, and so decides which program runs next.

## Interface (`ecpm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | Clock; synchronous active-high reset. The memory is not reset. |
| `din_ext` | in | 1 | One-cycle pulse in idle. It loads `xp`, `yp`, `con_b` and `key`. Hold `xp`, `yp` and `con_b` stable for the two cycles after the pulse. |
| `start` | in | 1 | Starts a point multiplication on the loaded data. |
| `key` | in | 233 | The scalar d. Bit 231 must be 1. Bit 232 is ignored. |
| `xp`, `yp` | in | 233 | Affine base point. |
| `con_b` | in | 233 | Curve constant b. The constant a is not needed. |
| `done` | out | 1 | High for two cycles. |
| `doutf` | out | 233 | x of d·P in the first `done` cycle, y in the second, otherwise 0. |

**Restrictions**

* **Key range.** The ladder starts from (P, 2P) and walks bits 230…0. A key
  therefore has to lie in [2^231, 2^232).
* **Degenerate cases.** There is no handling of the point at infinity. Results
  are only meaningful if no intermediate Z is 0, which is the case for
  cryptographic keys and points.

## Choices made here, and differences from the published design

* **Latency.** The published design reports 7208 cycles, with 18 cycles of
  post-processing after the two inversions. This instruction list needs 30
  cycles plus two fetch cycles there, for 7223 in total. Every other phase
  matches the published counts: 1 idle, 6 for the conversion, 29 per ladder
  bit, and 242 per inversion.
* **Ladder length.** The published cycle formula runs 29 × (m − 2) = 231
  ladder steps. Its algorithm listing instead loops from m − 2 down to 0, which
  is 232 steps. The cycle formula is followed here, which sets the key range
  above.
* **Memory.** The published design uses a vendor dual-port block RAM. Here it
  is a register array. The cross-port forwarding is an addition that makes the
  one-per-cycle inversion possible. An FPGA block RAM does not provide it.
* **Inversion order.** In the inversion, squares and products are interleaved
  along the addition chain, rather than all squares first.
* **Unstated details chosen here:**
  * the load protocol and the constant one sent through the external leg of
    `c1`;
  * the output protocol;
  * the reset;
  * the memory map;
  * the y-recovery instruction sequence;
  * the rounding of odd Karatsuba splits, where the low half takes the extra
    bit.
* **Reduction polynomial.** The NIST trinomial z²³³ + z⁷⁴ + 1 is assumed.
* **Lint.** Verilator lint warns that `kara_mul` has undriven nets. This refers
  to an unelaborated copy of the self-instantiating module, not to the
  instances that are actually built.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `tb/gf_ref_pkg.sv` is an independent reference:

* shift-and-add field multiplication;
* Fermat inversion;
* affine double-and-add scalar multiplication.

| testbench | checks |
|---|---|
| `tb_ecpm_top` | Runs the full design at its default size. It computes d·P for the B-233 base point (four keys, among them 2^231 and 2^232 − 1) and for random points on random curves with a = 0 and a = 1. It compares x and y with the reference and checks the 7223-cycle latency. It also checks that loading, the constant-one write, both ladder branches, the inversions, dual writes and forwarding all occur. |
| `tb_ecpm_ctrl` | Checks the control unit from its outputs: load writes, phase lengths, the branch taken for every key bit, and the counts of squares, products and additions. |
| `tb_itoh_tsujii_seq` | Runs the sequencer on the real datapath. It checks the inverse, that a·a⁻¹ = 1, that the source word is unchanged, and the 242-cycle / 232 + 10 operation count. |
| `tb_gf_mult`, `tb_kara_mul`, `tb_gf_reduce`, `tb_gf_squarer`, `tb_gf_adder` | Random and corner-case operands against the reference. |
| `tb_dp_ram` | Random dual-port traffic against a model, including forwarding. |
| `tb_arith_unit`, `tb_routing_net` | Every select setting. |

To run one, for example the end-to-end test (about 15 s):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ecpm_top \
  -y rtl -y tb rtl/gf233_pkg.sv tb/gf_ref_pkg.sv tb/tb_ecpm_top.sv
./obj_dir/Vtb_ecpm_top
```

Synthesis is not timed here. The critical path is the memory output through
the 233-bit Karatsuba tree and the reduction, back to the memory input.

## Changing the design

* **Field size.** `M` and `K` appear as parameters throughout. The memory map,
  the 4-bit addresses and `gf233_pkg` assume 12 words. The testbench reference
  is written for 233 bits.
* **Karatsuba depth.** `kara_mul.LEVELS` changes the depth of the recursion.
  `LEVELS=0` gives a plain schoolbook multiplier.
* **Programs.** The control programs are functions in `ecpm_ctrl`
  (`apc_prog`, `lad_prog`, `pac1_prog`, `pac2_prog`). Each instruction names
  two read words, an optional addition destination (port a) and an optional
  product, square or copy destination (port b).
