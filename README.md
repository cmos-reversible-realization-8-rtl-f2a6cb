# 8-bit reversible adder/subtractor built from WG gates

This design adds or subtracts two 8-bit numbers with one reversible 4-input,
4-output gate per bit: the WG gate. In a reversible gate, the inputs can always
be worked out from the outputs. The gate's outputs are chosen so that a single
mode bit, fed to every gate, turns a ripple-carry adder into a ripple-borrow
subtractor. No separate complement stage or multiplexer is needed. Next to it
sits the conventional circuit the reversible one replaces: a complementer, a
multiplexer and a carry-lookahead adder. Both are purely combinational.

## The WG gate (`rtl/wg_gate.sv`)

Inputs A, B, C, D; outputs

    P = A
    Q = A ^ B ^ D
    R = A ^ B ^ C
    S = (A^D^B)(A^D^C) ^ (A^D)

The mapping from {A,B,C,D} to {P,Q,R,S} is a bijection, which the testbench
checks on all 16 inputs. The key to the design is that S is the **majority of
(A^D), B and C**. To see why, write x = A^D. Then S = (x^B)(x^C) ^ x. When x=0
this is B·C. When x=1 it is ¬(¬B·¬C) = B+C. Both cases equal maj(x,B,C).

Put an operand bit on A and B, a carry on C and the mode on D:

| D (mode) | R                | S                       | the gate acts as |
|----------|------------------|-------------------------|------------------|
| 0        | a ^ b ^ c        | maj(a, b, c)            | full adder: sum, carry |
| 1        | a ^ b ^ c        | maj(¬a, b, c)           | full subtractor a−b−c: difference, borrow |

R does not depend on D. A full adder's sum and a full subtractor's difference
have the same formula, so only the carry output needs to know the mode.

P and Q are *garbage outputs*. They serve no arithmetic purpose, but they keep
the gate reversible: a = P, and b = Q ^ P ^ D.

The quantum cost of one gate is 10. In this cost model, a 1×1 gate costs 0 and a
2×2 gate costs 1, and a circuit costs the sum of the basic gates it is made of.

## The reversible adder/subtractor (`rtl/reversible_realization2.sv`)

The circuit is a chain of WIDTH = 8 WG gates. Gate i is wired as follows:

- A = a[i], B = b[i], C = c[i], D = m
- R → s[i], S → c[i+1]
- P, Q → garbage[2i], garbage[2i+1] (G1..G16 in the usual numbering)

The carry into the first gate, c[0], is the one constant input and is 0. The
result is:

- `m = 0`: s = a + b mod 256. `c_out` (C8) is the carry out.
- `m = 1`: s = a − b mod 256. `c_out` is the **borrow**: it is 1 when a < b.

The subtract mode is a true borrow chain, not "A plus the 2's complement of B",
so the carry-in must be 0 in both modes. A carry-in of 1 would compute a − b − 1
in subtract mode.

Cost of the 8-bit circuit:

| gates | constant inputs | garbage outputs | quantum cost |
|-------|-----------------|-----------------|--------------|
| 8 WG  | 1 (c[0])        | 16              | 80 (8 × 10)  |

The published comparison for this circuit claims 10 gates, 14 garbage outputs
and a quantum cost of 40, and elsewhere speaks of four WG gates. Those figures
cannot be matched to an 8-bit chain of one gate per bit. The RTL follows the
gate-level wiring: eight gates and sixteen garbage outputs.

Ports: `a[7:0]`, `b[7:0]`, `m` and `s[7:0]` are the interface of the original
top module. `c_out` and `garbage` are extra outputs, so that no gate output is
left unconnected.

Delay: a ripple chain of 8 gates. No clock or registers are involved.

## The conventional adder/subtractor (`rtl/conv_addsub.sv`)

This is the circuit the reversible one replaces:

- `complementer`: forms ~B.
- `operand_mux`: passes B when `en = 0` and ~B when `en = 1`.
- `cla_adder`: adds the selected operand to A, with carry-in = `en`.

With `en = 1` the circuit computes A + ~B + 1, which is A minus B in 2's
complement. Here `c_out` is a carry: in subtract mode it is 1 when **no** borrow
occurs (a ≥ b). This is the opposite sense of the reversible circuit's `c_out`.

`cla_adder` builds every carry in one level from generate g = a&b, propagate
p = a^b and the carry-in: c[i+1] = g[i] | p[i]g[i−1] | … | p[i]…p[0]c_in. Each
sum bit comes from an `aoi_full_adder` driven by a[i], b[i] and the lookahead
carry c[i]. The full adder's own carry output is not used in the datapath.
Instead, an immediate assertion checks that it equals c[i+1] for every bit.

`aoi_full_adder` is the AND-OR-Invert full adder:

    w0,w1,w2 = ab, a·cin, b·cin      w3 = NOR(w0,w1,w2)   c_out = ¬w3
    w4 = a+b+cin                      w5 = w3·w4
    w6 = a·b·cin                      w7 = NOR(w5,w6)      s = ¬w7

w5 is high when exactly one input is high, and w6 when all three are. Together
they give the parity of the three inputs.

## Top level (`rtl/addsub_top.sv`)

`addsub_top` places the two circuits side by side. The reversible circuit uses
the `rev_*` ports and the conventional one uses the `conv_*` ports. They share
nothing, so the same operands can be applied to both and the results compared.
`addsub_pkg` holds the shared width (8), the mode encoding
(`MODE_ADD = 0`, `MODE_SUB = 1`) and the WG gate's quantum cost.

Every module takes a `WIDTH` parameter, 8 by default. The reversible chain and
the conventional circuit work at any width. The single-level lookahead in
`cla_adder` grows quadratically with width.

## Departures and choices

- **C0 = 0.** The carry into the first WG gate is fixed at 0 in both modes.
  The original drawing seems to join it to the mode line. With the gate's
  equations, that would make subtraction give a − b − 1.
- **Extra ports.** `c_out` and `garbage` are brought out on the reversible
  circuit, and `rev_c8`/`rev_garbage` on the top. The original top has only
  a, b, m and s.
- **Gate count.** The RTL has 8 WG gates, 16 garbage outputs and a quantum cost
  of 80, not the quoted 10 gates, 14 garbage outputs and cost 40 (see above).
- **2's complement.** In the conventional circuit, the +1 of the 2's
  complement enters through the adder's carry-in. The complementer itself only
  inverts.
- **Lookahead structure.** The carry-lookahead adder is described only by name.
  The single-level form used here is one choice among many.
- **AOI wiring.** The gate types and net names of the AOI full adder are
  given. Which input pair feeds each of the first three AND gates is the only
  assignment that yields a full adder.
- **Timing.** Delays were reported for the conventional circuit: 0.14 ns
  (schematic) and 0.38 ns (layout) from inputs to a valid sum. They are not
  modelled. All logic is zero-delay combinational.
- **Not modelled.** Nothing here is reversible at the physical level. The RTL
  describes the gates' Boolean functions, which is all that a synthesizable
  description can carry. Power, quantum cost and CMOS layout are outside it.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. The
arithmetic tests are exhaustive: all 65,536 operand pairs in both modes. They
run in well under a second. For example:

    verilator --binary --timing --assert -Mdir obj -y rtl \
        rtl/addsub_pkg.sv tb/tb_addsub_top.sv --top-module tb_addsub_top
    ./obj/Vtb_addsub_top

`tb_addsub_top` runs both circuits at their default width. It checks:

- each result against integer arithmetic;
- the two circuits against each other;
- that the operands can be recovered from the reversible circuit's garbage
  outputs;
- the example 10100010 + 11100011 = 1_10000101.

It also counts how often additions, subtractions, carries, borrows and zero
results occurred, and fails if any of them never did.
