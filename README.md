# Conservative reversible datapath: V and Q 6*6 gates, adders

In a **reversible** gate every output word comes from exactly one input word,
so no information is destroyed. A **conservative** gate also keeps the number of
ones the same from input to output. The simplest way to get both properties is a
gate that only *routes* its inputs: a control bit decides which input goes to
which output pin, and nothing is computed. This RTL builds arithmetic from such
routing gates:

* two 6-input, 6-output gates, **V** and **Q**. Each acts as a half adder and
  produces several Boolean functions of two operands at once;
* a **reversible full adder** from a V gate, a small 4*4 routing block and a
  Fredkin gate;
* a **ripple-carry adder** and a **carry-lookahead adder** built on them.
  The lookahead carries come from chains of a generalised *k*k* gate.

The whole design is combinational. It has no clock and no reset. It is meant as
a functional model of the gate-level structure. It does not model an
energy-efficient implementation: in CMOS these gates are plain multiplexers.

## The building blocks

### Fredkin gate (`fredkin_gate`, `fredkin_dup`)

The 3*3 Fredkin gate passes control `C` to `P` and swaps `D` and `E` when the
swap condition holds.

`SWAP_ON` chooses which control value swaps: 1 for the standard gate
(swap when C=1), 0 for the OR configuration (swap when C=0).

With `SWAP_ON=1` and `E=0`, the gate gives `R = C AND D`. With `SWAP_ON=0` and
`E=1`, it gives `R = C OR D`. The full adder uses this second form.

A reversible circuit cannot fan a wire out. A signal needed twice is copied
instead. `fredkin_dup` does this: it is a standard Fredkin gate with `D=0` and
`E=1`, and it turns `A` into `(A, A, A')`.

### V gate (`v6_gate`)

Ports `x y z a b c` are inputs X..C. Ports `o1..o6` are outputs I..VI. X goes
to I and Z goes to III in both cases. With X=0, every other input goes straight
across. With X=1, the routing is:

| output | I | II | III | IV | V | VI |
|--------|---|----|-----|----|---|----|
| X=1 source | X | A | Z | Y | C | B |

Feed it `(A, A, A', B, B, B')`. It then returns
`A, A·B, A', A+B, A⊕B, A⊙B` (⊙ = XNOR). You can check this case by case. When
A=0, nothing moves: II=Y=0, IV=B, V=B, VI=B'. When A=1, II takes B, IV takes a
1, V takes B' and VI takes B. For the adders, output II is the **generate**
signal, IV the **propagate** signal, and V the half-adder sum.

### Q gate (`q6_gate`)

Same port layout. With X=1:

| output | I | II | III | IV | V | VI |
|--------|---|----|-----|----|---|----|
| X=1 source | X | A | B | Y | C | Z |

On `(A, A, A', B, B, B')` the Q gate returns
`A, A·B, A'+A·B, A+B, A⊕B, NOR(A,B)`. NOR on its own is a universal function.
This routing is derived from those six output functions. With these inputs, A
and B carry the same value, so sending A to III and B to II would work equally
well. A different routing that sometimes appears with this gate
(Y→IV, Z→V, A→II, B→VI, C→III) does **not** produce these functions. It is
used as the injected fault in the Q gate's test.

### 4*4 block (`rev_4x4`)

Input 1 is the control (the carry in). With C=0 everything passes straight
through. With C=1 the routing is input 2→output 4, input 3→output 2 and
input 4→output 3. Fed with `(Cin, A⊕B, A⊙B, 0)`, output 2 is
`Cin ⊕ A ⊕ B` (the sum) and output 4 is `Cin·(A⊕B)`.

## Reversible full adder (`rev_full_adder`)

```
A ──dup──┐                ┌─ V (A⊕B) ─┐
B ──dup──┤ V gate ────────┼─ VI (A⊙B) ┤ 4*4 (ctl Cin, 4th input 0) ─ out2 = Sum
         │                │           └─ out4 = Cin·(A⊕B) ─┐
         │                └─ II (A·B) ─────────────────────┤ Fredkin, OR config,
         │                                                 │ E = 1
         │                                                 └─ R = Cin·(A⊕B) + A·B = Cout
```

The carry is `Cin·(A⊕B) + A·B`. This is the usual full-adder carry, and the two
terms can never both be 1. The Fredkin gate must be the OR form (`SWAP_ON=0`):
its constant 1 is on E and the carry leaves on R. A standard Fredkin gate would
put a 1 on R whenever its control is 0.

The adder takes six constants: 0 and 1 for each duplicator, 0 for the 4*4 block,
and 1 for the Fredkin gate. Besides sum and carry it has seven **garbage
outputs**, all on the `garbage` port. So 9 bits go in and 9 bits come out. The
testbench checks that the ones count is preserved:
`a + b + cin + 3 == sum + cout + popcount(garbage)`. It also checks that no two
inputs give the same output word.

## Ripple-carry adder (`rev_rca`)

`WIDTH` full adders, each passing its carry to the next. `garbage` has 7 bits
per bit position. The default `WIDTH = 4` is a choice made to match the
lookahead adder; the published design gives no width for the ripple-carry
adder.

## Lookahead carry: the k*k gate chain (`kk_gate`, `cla_cout`)

This is the least obvious part of the design.

**k*k gate.** Inputs A1..A(k-2) pass through unchanged; let f be their AND.
The last two inputs are transformed:

```
p_km1 = f·A(k-1)  ⊕ A(k)
p_k   = f'·A(k)'  ⊕ A(k-1)'
```

For f=1 this maps `(A(k-1), A(k))` to `(A(k-1)⊕A(k), A(k-1)')`. For f=0 it maps
them to `(A(k), A(k-1)⊕A(k))`. Both maps are one-to-one, so the gate is
reversible, though not conservative. With `A(k-1) = 0`, the output is
`p_k = f + A(k)`. So one gate ANDs a group of signals and ORs the result onto a
running value.

**Carry-out block.** The carry out of an N-bit group, fully expanded, is

```
Cout = G[N-1] + P[N-1]G[N-2] + P[N-1]P[N-2]G[N-3] + ... + P[N-1]...P[0]·Cin
```

`cla_cout` builds it from N k*k gates in a row. The running value starts as
`G[N-1]`. Gate j (j = 1..N, width K = j+3) multiplies `P[N-1]..P[N-j]` by
`G[N-1-j]`, or by `Cin` for the last gate, and ORs the product in. For N=4 the
products are `P3G2`, `P3P2G1`, `P3P2P1G0` and `P3P2P1P0Cin`. The delay is N gates
in series. Each gate does a flat AND of its group, so no carry ripples through
the bit positions.

The P signals are wired to several gates. A strictly reversible build would make
each copy with a `fredkin_dup`. The published block does not show how the copies
are made, and this RTL leaves the copying out.

## Carry-lookahead adder (`rev_cla`)

For each bit there are two duplicators and a V gate. Together they give
P = A+B, G = A·B, A⊕B and A⊙B. The carry into bit i+1 comes from an (i+1)-bit
`cla_cout` fed with `P[i:0]`, `G[i:0]` and Cin. A 4*4 block controlled by the
carry into bit i turns `(A⊕B, A⊙B, 0)` into the sum bit. The carry out is the
WIDTH-bit block, which is the 4-bit carry-out block at the default width.

The published design gives only the carry-out block and the P/G outputs of the
V gate. Two parts are this design's own choices: making every internal carry
with its own smaller block, and forming the sum bits with the full adder's 4*4
block. The garbage outputs stay inside the module.

## The top: `rev_datapath`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | WIDTH | operands |
| `cin` | in | 1 | carry in |
| `rca_sum`, `rca_cout` | out | WIDTH, 1 | ripple-carry result |
| `cla_sum`, `cla_cout` | out | WIDTH, 1 | lookahead result |
| `q_in` | in | 6 | Q gate inputs `{X,Y,Z,A,B,C}` |
| `q_out` | out | 6 | Q gate outputs `{I..VI}` |

Both adders add the same operands and must agree. The Q gate stands beside them
with its own ports, because no adder here uses it. `WIDTH` defaults to 4.

## Where this RTL departs from, or goes beyond, the published design

* **Q gate routing.** It is derived from the stated output functions. The
  routing listed in prose does not produce them (see above).
* **Full adder's Fredkin gate.** It is read as the OR configuration, because
  that is the only way the drawn constant 1 and carry output fit together.
* **V output VI.** It is taken as A XNOR B. One drawing of the full adder labels
  it A XOR B, but the gate definition and the 4*4 block both need XNOR.
* **Duplicators.** Duplicators in front of every V gate are included. The
  full-adder drawing omits them, but the text says that is where the gate's
  input copies come from.
* **k*k gate output.** The first computed output of the k*k gate appears in the
  source drawing under the name of a pass-through output. Here it is named
  `p_km1`.
* **Design choices.** The ripple-carry width, the internal carries and sum path
  of the lookahead adder, and the fan-out of P signals are all this design's
  own.
* **Not modelled.** The transmission-gate CMOS realisation of the V gate is not
  modelled. It is a transistor circuit with the same logic function as
  `v6_gate`.

## Verification

Each module in `rtl/` has a self-checking testbench in `tb/` (`tb_<module>.sv`).
Each one ends by printing `TB_RESULT checks=N failures=M`:

* Gates are tested exhaustively on three points:
  * routing against a permutation table;
  * ones count (conservative gates);
  * one-to-one mapping (every reversible gate, including `kk_gate` for K=3..7).
* Gates are also checked on their intended inputs: the V and Q functions, and
  the Fredkin AND and OR uses.
* `rev_full_adder` is tested on all 8 inputs, including preservation of the
  ones count over all 9 outputs.
* `rev_rca` is tested on all 4-bit inputs plus random 8-bit inputs.
* `rev_cla` is tested exhaustively at 4 and 6 bits.
* `cla_cout` is compared with a bit-by-bit carry reference at N = 1, 4 and 6.
* `tb_rev_datapath` runs the top at its default parameters. It covers every
  4-bit operand pair and carry in, and all 64 Q gate inputs. It counts overflow,
  carries that cross every bit, generated carries, and both Q gate modes, and it
  fails if any of these never happens.

Each testbench was also run against a copy of its module with one deliberate
error, and it reported failures.

To run one, for example the top:

```
verilator --binary --timing --assert -Irtl tb/tb_rev_datapath.sv \
          --top-module tb_rev_datapath -o sim && obj_dir/sim
```

Every run takes well under a second. All delays in the testbenches are only for
sequencing, since the design is combinational. Lint with
`verilator --lint-only -Wall -Irtl rtl/<module>.sv`. The only warnings are
unused garbage outputs, and those are expected.
