# Genus-2 hyperelliptic-curve coprocessor over GF(2^89)

This coprocessor computes the scalar multiple k·P of a divisor P in the Jacobian
of a genus-2 hyperelliptic curve. That is the core operation of hyperelliptic-curve
public-key cryptography (HECC). The curve is

    y^2 + x·y = x^5 + f1·x + f0        over GF(2^89),  field polynomial x^89 + x^38 + 1

A genus-2 Jacobian over an 89-bit field has about 2^178 elements. That gives roughly the
security of 160-bit elliptic-curve cryptography, but the field words are only 89 bits wide.
Divisors use Mumford's representation, `u = x^2 + u1·x + u0` and `v = v1·x + v0`.

Inside the coprocessor, divisors are kept in projective form `[U1, U0, V1, V0, Z]`, where
`u1 = U1/Z` and so on. This lets the doubling and the addition run with no field inversion
at all. Only the final conversion back to affine form uses the inverter.

The organisation is the low-area, shared-resource one:

* one group-operation unit, with two digit-serial multipliers and one inverter;
* a register file held in a 25-word memory;
* a single operand bus between the register file and the arithmetic units;
* a main controller that runs the left-to-right binary (double-and-add) method.

Field additions and squarings cost no cycles of their own. They are done on the operand bus
while a value moves from the register file to a multiplier.

## Block structure

```
hecc_coproc
├── hecc_main_ctrl        scalar multiplication sequencing, load/unload of the register file
├── hecc_group_unit       micro-coded group operations
│   ├── hecc_ucode_rom    the doubling / addition / conversion programs
│   ├── hecc_operand      operand bus: add two registers, square or fourth-power each
│   │   └── gf_sqr ×4
│   ├── gf_mul ×2         LSD-first digit-serial multipliers, D = 16
│   └── gf_inv            modified almost-inverse inverter, 4 steps per cycle
└── hecc_regfile          25 × 89-bit memory, 2 read ports, 1 write port
```

`hecc_pkg` holds the field constants, the register map, the micro-instruction format
and the routine entry points.

## Field arithmetic

**Multiplier (`gf_mul`).** The multiplier is least-significant-digit first. For the digits
B_i of D bits, it accumulates `C += A·B_i mod p` and `A ← A·x^D mod p` once per clock.
Each partial product is reduced in the same cycle by folding with `x^89 = x^38 + 1`.
With D = 16, a product takes ceil(89/16) = 6 cycles, and the start cycle already handles
the first digit. D is a parameter, so any digit size from 1 to 89 can be built.

**Squarer (`gf_sqr`).** Squaring is linear in characteristic two. The input bits are spread
to the even positions and the upper half is folded back. The result is XOR gates and wiring
only.

**Inverter (`gf_inv`).** The inverter uses the modified almost-inverse algorithm. It keeps
`u, v, b, c` with `b·a ≡ u` and `c·a ≡ v (mod f)`, and repeats one of two steps:

* if u is even: u/x, and b/x mod f;
* if u is odd: swap when deg u < deg v, then add.

It stops when u = 1, and b is then the inverse. Dividing b by x at every step removes the
final correction by x^-k that the plain almost-inverse algorithm needs.

The loop is unrolled: UNROLL = 4 primitive steps are chained in one clock cycle. The degree
test needs no priority encoder, because deg u < deg v exactly when `u < v` and `u < u⊕v`.
Measured at UNROLL = 4: 54 cycles on average and 61 at most, over 200 random operands.
A zero input ends at once, with `zero_in` set.

## The operand bus and the micro-code

This part carries the design. Read it before changing `hecc_ucode_rom`.

### Micro-instructions

A micro-instruction (`uinst_t`) is one of four kinds:

| op        | effect                     | units            |
|-----------|----------------------------|------------------|
| `UOP_MUL` | `dst = A · B + R[c]`       | multiplier       |
| `UOP_LIN` | `dst = A + R[c]`           | bus only         |
| `UOP_INV` | `dst = A^-1`               | inverter         |
| `UOP_END` | end of routine             |                  |

An operand A or B is the sum of two register sources, `R[s0]^(2^pw0) + R[s1]^(2^pw1)`.
Each power pw is 0 (the value as is), 1 (squared) or 2 (fourth power). So expressions like
`Z·(t + V1²)`, `(s4+s5)·(U1+U0)` or `Z^4·U0` are single multiplications. The write-back
path adds one more register, `R[c]`.

Registers 0 and 1 are the constants 0 and 1. A source with nothing to add names register 0,
and `(1 + U1)` names register 1.

### Pairs

When `par` is set on a multiplication, that instruction and the next one form a pair and run
on the two multipliers at once. The sequencer (`hecc_group_unit`) then:

1. fetches both instructions;
2. moves the four operands over the bus, one per cycle (A0, B0, A1, B1);
3. starts both multipliers;
4. waits 6 cycles;
5. writes the two results back one after the other.

Two rules follow, and the micro-code relies on both:

* Both halves of a pair read their operands before either one writes. A pair can therefore
  overwrite one of its own inputs.
* The second half's `c` is read after the first half has written. So `c` may name the first
  half's destination, to sum two products (for example `r = z2·z3 + z1²·u10`).

### Overlap of bus transfers and arithmetic

The sequencer has a front end and a back end. The front end fetches instructions and moves
operands over the bus. The back end holds the instruction in flight: it waits for the
multipliers or the inverter and then writes the results back. While the multipliers work, the
front end already reads the next instruction's operands, and it issues that instruction as
soon as the back end is in its last write-back cycle. (The units' outputs change only after
that clock edge, so the write in that cycle is unaffected.) So, with no stalls, a pair costs
8 cycles from issue to issue: 6 to multiply and 2 to write back. The fetch of the next pair
and its four operand transfers fit inside the 6 multiply cycles.

The front end stalls in two cases:

* it would read a register that the instruction in flight has still to write (a
  read-after-write hazard);
* a write-back is running, which uses read port 0 for `c`.

An assertion (`a_no_raw`) checks that no operand is read past a pending write. The results
are therefore the same as with strictly sequential execution. Only the timing depends on
how often consecutive instructions depend on each other. The micro-code was written for
correctness first and has not been reordered to avoid stalls; the measured costs below
include them.

### Routines

| routine | entry       | does                             | cost                                             | cycles (measured) |
|---------|-------------|----------------------------------|--------------------------------------------------|-------------------|
| DBL     | `UPC_DBL`   | Q = 2Q, projective, no inversion | 31 M (15 pairs + 1 single), 7 S on the bus, 4 LIN | 162               |
| ADD     | `UPC_ADD`   | Q = Q + P, P affine, no inversion | 43 M (21 pairs + 1 single), 4 S on the bus, 2 LIN | 218               |
| AFF     | `UPC_AFF`   | Q to affine form                 | 1 I, 4 M, 1 LIN                                  | ≈ 85              |
| INIT    | `UPC_INIT`  | Q = P, Z = 1                     | 5 LIN                                            | 18                |

**Doubling.** The doubling works for h = x and f = x^5 + f1·x + f0. It needs neither f1 nor
f0. Its stages are:

1. the resultant and its precomputations (Z², V1², U1² on the bus, and U1·Z);
2. k0 = U1·U1² + Z(Z·V1 + V1²);
3. s3, s1 and s0;
4. R = Z⁴U0, R~ = R·s1, s4 = s3·s1, s5 = s0·s3, S = s5·Z and R'' = R~·s4;
5. l2, l0 and l1;
6. U0'' = s0² + R·s3·Z and U1'' = R²;
7. l3, w6 and w7;
8. Z' = s1²·R~, U1' = R~·U1'' and U0' = R~·U0'';
9. V0' = w6 + R''·V0 and V1' = w7 + R''·V1 + Z'.

The comments in `hecc_ucode_rom` name each intermediate next to the instruction that makes it.

**Addition.** The addition is a mixed one: the running divisor Q is projective, and the base
divisor P is affine. That is all the binary method needs, since it only ever adds P. The
formula is the affine explicit addition for h = x with every fraction carried over a common
denominator, so that no inversion remains. In affine terms, the affine formula computes:

* the resultant r of u_Q and u_P;
* s' = r·s mod u_P;
* the new u and v, which contain 1/s1' and s1'/r.

Here, with Z the denominator of Q:

1. Z1 = U11 + u21·Z and Z2 = U10 + u20·Z (Q's u minus P's u, scaled by Z), and likewise W0, W1 for v.
2. Z3 = U11·Z1 + Z·Z2, the resultant R = Z2·Z3 + Z1²·U10, and the two coefficients
   S1 = Z·(Z2·W1 + Z1·W0) and S0 = Z3·W0 + U10·Z1·W1. These equal Z³ times r, s1', s0'.
3. T = Z·S1 and q = Z·R. These are the two denominators, Z⁴·s1' and Z⁴·r.
4. The numerators N1 (of u1', over T²) and N0 (of u0', over T³), from a = Z·S0,
   b = U11·S1 and c = Z1·S1.
5. W = (u21·T + a)·T + N1 and Y = N1·W + T·(N0 + L1·T²), where L1 = u21·a + u20·T.
6. The result [N1·T²q, N0·Tq, T·Y + (1 + v21)·Z', N0·W + T⁴·(u20·a + v20·q), Z' = T⁴q].

That is 43 multiplications and four squarings (Z1², q², T² and T⁴), all done on the bus. The instruction
comments in `hecc_ucode_rom` follow these names. The straight-line version in the testbench
package (`add_proj`) is the reference, and its affine image is checked against the plain
affine addition formula.

**Register allocation.** The allocation was done by hand from the live ranges. The running
divisor uses 5 words, the base divisor 4, and the temporaries T0–T10 take 11. With the two
constant addresses, 22 of the 25 addresses are used. Any change to a routine must keep the
pair rules above and must not reuse a temporary while it is still live.

### Exceptional inputs

The formulae cover only the general case: weight-two divisors, u0 ≠ 0 when doubling, and
gcd(u_Q, u_P) = 1 when adding. Other inputs are not handled. Such an input makes a routine write Z = 0, for example
P + P in the addition or u0 = 0 in the doubling. Once Z is zero it stays zero, and the final
conversion then inverts zero. The group unit raises `exc` on either event, and the top reports
it as `r_exc`. Exceptional inputs that leave Z nonzero are not detected. For random cryptographic-size
inputs they have negligible probability.

## Scalar multiplication (`hecc_main_ctrl`)

On `start`, the controller:

1. writes `p_in` into the register file (PU1, PU0, PV1, PV0), one word per cycle;
2. shifts out the leading zero bits of k, one per cycle;
3. runs INIT for the leading one;
4. for every following bit, runs DBL, then ADD if the bit is one;
5. runs AFF;
6. reads the result out of the register file, one word per cycle.

`k = 0` gives the neutral element: `r_zero` is set and no group operation runs.
The controller owns the register-file ports only while loading and unloading. The rest of
the time the group unit owns them; an assertion in `hecc_coproc` checks this.

## Interface and timing (`hecc_coproc`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse while `busy` is low; `k` and `p_in` must stay stable until `done` |
| `k` | in | SCALAR_BITS (178) | scalar |
| `p_in[4]` | in | 89 each | base divisor {u1, u0, v1, v0}, affine |
| `busy` | out | 1 | running |
| `done` | out | 1 | one-cycle pulse; `r_out` valid from then on |
| `r_out[4]` | out | 89 each | k·P, affine {u1, u0, v1, v0} |
| `r_zero` | out | 1 | result is the neutral element (k = 0) |
| `r_exc` | out | 1 | a general-case formula did not apply; `r_out` is invalid |
| `stat_dbl`, `stat_add`, `stat_skip` | out | 16 | doublings, additions and skipped leading zeros of the last run |
| `stat_pair`, `stat_mul`, `stat_lin`, `stat_inv` | out | 32 | micro-operations since reset |

Parameters: `SCALAR_BITS = 178`, `D = 16` (digit size) and `UNROLL = 4`. The field size is a
package constant (`hecc_pkg::M`, `K`).

A full 178-bit scalar with its top bit set took 49,508 cycles in simulation: 177 doublings,
93 additions and one inversion. The run time is about 162 cycles per bit, plus about 218
per one bit.

## Departures from the published design and open points

* **Addition formula.** The published coprocessor adds two projective divisors
  (45 multiplications, 4 squarings). The addition here is a mixed projective-plus-affine
  formula derived for this design (43 multiplications, 4 squarings). Its result is a
  different projective representative of the same divisor.
* **Speed.** The published type-3 projective coprocessor over GF(2^89) needs about 32,900
  cycles per scalar multiplication; this one about 49,500. The write-back is only partly
  overlapped with the next multiplication, and the micro-code has not been reordered to avoid
  read-after-write stalls.
* **Inverter cycle count.** The published inverter takes 178 cycles at unrolling level 1 and
  97 at level 4. This one takes about 54 at level 4, because each unrolled step here is a
  whole primitive step. Its critical path is correspondingly longer. No timing analysis was
  done.
* **Interfaces, reset, bus protocol and register allocation** are this design's own.
* **Not built:**
  * the comb scalar-multiplication method;
  * the affine-coordinate coprocessors;
  * the type-1 (separate adder and doubler, parallel binary method) and type-2
    (register-based, multiplexer interconnect) organisations;
  * the GF(2^113) field.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a watchdog. `tb_hecc_ref_pkg` is a separate
bit-level model used for comparison. It has shift-and-add field multiplication, inversion by
exponentiation, and the group formulae written as straight-line code. It can also draw a
random divisor and pick f1, f0 so that the divisor lies on the curve. Every result divisor is
checked against the reference, and the testbenches also check that
`v² + x·v + f ≡ 0 (mod u)`.

| testbench | checks |
|---|---|
| `tb_gf_sqr`, `tb_gf_mul`, `tb_gf_inv` | random and edge operands; multiplier latency is exactly 6 cycles; inverter within 68 cycles |
| `tb_hecc_operand`, `tb_hecc_regfile` | all power combinations; constants, every entry, both ports |
| `tb_hecc_group_unit` | INIT, DBL (with random Z, and chained), ADD, AFF against the model; P + P flags `exc` |
| `tb_hecc_main_ctrl` | operation sequence against the bits of k, with stand-ins for the group unit and register file; k = 0, 1, leading zeros, exception reporting |
| `tb_hecc_coproc` | end to end with a 24-bit scalar; counts doublings, additions, skipped zeros, pairs, bus-only operations, inversions, neutral and exceptional cases |
| `tb_hecc_coproc_full` | one complete 178-bit scalar multiplication at the default parameters |

The doubling and addition formulae were also cross-checked with each other: 2(2D) equals
((2D + D) + D) on random divisors.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hecc_pkg.sv tb/tb_hecc_ref_pkg.sv tb/tb_hecc_coproc.sv \
    --top-module tb_hecc_coproc -o sim
./obj_dir/sim
```

Replace the testbench name to run any of the others. All of them finish in well under a
second.
