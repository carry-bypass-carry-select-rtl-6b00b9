# Reversible-logic carry bypass and carry select adders

A reversible gate maps every input vector to a distinct output vector. Because
no information is erased, the inputs can always be recomputed from the
outputs. This library builds two classic 4-bit adder structures, a carry
bypass (carry skip) adder and a carry select adder, entirely from three
reversible gates: TSG, Toffoli and Fredkin. It also provides four further 4x4
reversible gates, NRG1 to NRG4, each useful for a small logic function.

Everything here is combinational logic: there is no clock, no reset and no
state. The RTL describes the *logical* function of each gate, including the
outputs that are not needed ("garbage" outputs). It says nothing about the
charge-recovery or transistor-level circuits that make reversible logic save
power. Those are outside what RTL can express.

## The three building gates

| gate | lines | equations | role in the adders |
|------|-------|-----------|--------------------|
| `tsg_gate` | 4 in, 4 out | with `c = 0`: `p = a`, `q = a^b`, `r = a^b^d`, `s = (a^b)d ^ ab` | full adder. `r` is the sum, `s` the carry out, `q` the propagate bit |
| `toffoli_gate` | 3 in, 3 out | `p = a`, `q = b`, `r = ab ^ c` | 2-input AND when `c = 0` |
| `fredkin_gate` | 3 in, 3 out | `p = a`, `q = a'b ^ ac`, `r = a'c ^ ab` | 2:1 multiplexer: `q = a ? c : b` |

Each gate produces more outputs than an irreversible equivalent would. In the
adders the spare outputs stay unconnected; they are garbage outputs.

The TSG gate is only specified for full-adder use, with its third input at 0.
For a nonzero third input, `tsg_gate` follows the usual TSG definition:
`q = a'c' ^ b'`, `r = q ^ d`, `s = qd ^ ab ^ c`. This reduces to the table
above when `c = 0` and keeps all 16 input vectors distinct. Toffoli and
Fredkin are their own inverses: feeding the outputs back in returns the
inputs. The testbenches check this "backward computation".

## Carry bypass adder (`carry_bypass_adder`)

```
 a[i],b[i] ──► TSG ──► TSG ──► TSG ──► TSG ──► ripple carry ─┐
 cin ───────►  │q      │q      │q      │q                    ├─► Fredkin (ctrl = BP) ─► cout
               └─Toffoli─┘     └─Toffoli─┘                    │
                     └────Toffoli────┘ ─► BP ─────────────────┘ (cin on the other data input)
```

- Four TSG full adders form a ripple chain that produces `sum` and a ripple
  carry out.
- Each TSG's second output is the propagate bit `p[i] = a[i] ^ b[i]`.
- Three Toffoli gates, each used as an AND, multiply the propagate bits in a
  two-level tree: `(p0 p1)`, then `(p2 p3)`, then the product of the two. The
  result is the bypass signal `BP`.
- A Fredkin gate, with `BP` as its control, selects the carry out:
  - `BP = 1`: every bit propagates, so `cin` goes straight to `cout`.
  - `BP = 0`: `cout` is the carry out of the last TSG.
- The sum bits always come from the ripple chain; only the carry skips.

The logical result is always `a + b + cin`. The skip path only matters for
timing when blocks like this are cascaded: the carry then passes each block
through one multiplexer instead of four full adders.

- **Port `bypass`:** brings `BP` out so the skip path can be observed. This
  port is an addition of this implementation.
- **Parameter `WIDTH`:** defaults to 4. For other widths the AND tree is
  generated as a heap-ordered binary tree of `WIDTH-1` Toffoli gates. Node
  `i` ANDs nodes `2i+1` and `2i+2`, and the leaves are the propagate bits.
  For 4 bits this is exactly the tree above.

## Carry select adder (`carry_select_adder`)

- Two TSG ripple carry adders (`tsg_ripple_adder`) work on the same operands
  at the same time. One has its carry in tied to 0, the other to 1.
- `WIDTH + 1` Fredkin gates, all controlled by `cin`, pick each sum bit and
  the carry out. The bit comes from the carry-in-0 adder when `cin = 0` and
  from the carry-in-1 adder when `cin = 1`.
- For 4 bits this uses 8 TSG and 5 Fredkin gates.
- `cin` reaches every output through a single Fredkin gate. The cost is a
  second adder.

## Shared ripple adder (`tsg_ripple_adder`)

A chain of `WIDTH` TSG gates with their third inputs tied to 0. Both adders
use this module.

Ports:

- `sum`, `cout`: the result of the ripple addition.
- `prop`: the per-bit propagate signals, which the bypass adder needs.

## The NRG gates

All four are 4x4 gates. Inputs are `(a, b, c, d)` and outputs `(p, q, r, s)`.
Each one is defined by a 16-row truth table. The equations below are equal to
those tables.

| gate | intended use | equations | as arithmetic on `{b,c,d}` |
|------|--------------|-----------|----------------------------|
| `nrg1_gate` | `b = 0`: NOR, XNOR, NOT of `c, d` | `p = a`, `q = b ^ ~(c\|d)`, `r = ~(c^d)`, `s = ~d` | `{q,r,s} = {b,c,d} - 1` |
| `nrg2_gate` | `r` is a 2:1 mux, XNOR (`a=0`) or XOR (`a=1`) of `c, d` | `p = a`, `q = b ^ (a ? ~(c&d) : ~(c\|d))`, `r = a ? c^d : ~(c^d)`, `s = ~d` | `-1` when `a=0`, `+5` when `a=1` |
| `nrg3_gate` | `b = 1`: half adder, `q = cd` (carry), `r = c^d` (sum), `s = ~d` | `p = a`, `q = b ^ ~(cd)`, `r = c^d`, `s = ~d` | `{q,r,s} = {b,c,d} + 5` |
| `nrg4_gate` | parity check | `p = a`, `q = b`, `r = c`, `s = ~(a^b^c^d)` | |

All arithmetic is modulo 8. Adding a constant modulo 8 is a permutation, so
the "arithmetic" column shows directly why each gate is reversible.

`nrg4_gate`'s `s` is an **even**-parity flag: it is 1 when an even number of
inputs are 1. This follows the gate's truth table row by row. A prose
description of the gate gives the plain XOR instead. If you need odd parity,
invert `s`; the gate stays reversible either way.

## Top level (`reversible_adders_top`)

The two adders and the four NRG gates are independent designs. The top
places them side by side, each with its own ports:

- `byp_*`: the carry bypass adder.
- `sel_*`: the carry select adder.
- `nrgN_in` / `nrgN_out`: the NRG gates. Each uses the `reversible_pkg::gate4_t`
  struct, whose fields `l0..l3` are `(a,b,c,d)` on inputs and `(p,q,r,s)` on
  outputs.

The top does not tie the constant inputs of the NRG gates (`b = 0` for NRG1,
`b = 1` for NRG3). The user applies them.

## Where this departs from the original description, and how far to trust it

- **Verification:** all gates are verified against their equations or truth
  tables over every input vector, including a check that the outputs are all
  distinct. Both 4-bit adders are checked exhaustively (all 512 combinations
  of `a`, `b`, `cin`) against integer addition. Wider instances are checked
  on random operands.
- **Fredkin output used as the multiplexer output:** the `q` output, with the
  control on `a`. Another output assignment would work equally well.
- **`tsg_gate` with a nonzero third input:** follows the standard TSG
  definition, not a published table.
- **`nrg4_gate`:** see the note on parity polarity above.
- **Not modelled:** the transistor-level realisation of the TSG full adder
  (18 transistors, 0.25 um) and its delay and power figures.

## Files and simulation

- `rtl/reversible_pkg.sv`: the `gate4_t` type.
- `rtl/*_gate.sv`: the seven gates.
- `rtl/tsg_ripple_adder.sv`, `rtl/carry_bypass_adder.sv`,
  `rtl/carry_select_adder.sv`: the adders.
- `rtl/reversible_adders_top.sv`: the top level.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

To run one, for example the end-to-end test of the top at default size:

```
verilator --binary --timing --assert -Irtl rtl/reversible_pkg.sv \
  tb/tb_reversible_adders_top.sv --top-module tb_reversible_adders_top
./obj_dir/Vtb_reversible_adders_top
```

It also counts how often each mechanism occurred, and fails if one never
did:

- bypass taken and not taken;
- each carry select input chosen;
- both NRG2 mux settings;
- the NRG3 carry;
- even and odd NRG4 parity.

Verilator's `-Wall` lint reports `PINCONNECTEMPTY` for the open garbage
outputs; they are unconnected on purpose.
