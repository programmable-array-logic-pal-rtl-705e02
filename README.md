# Reversible PAL, PLA and PROM

These are programmable logic devices (PLDs) built only from *reversible* gates. A reversible gate
has as many outputs as inputs and maps its inputs one-to-one onto its outputs, so it loses no
information. Two rules of reversible circuits shape the design. First, a signal may not fan out:
every gate output drives exactly one input. Second, there is no feedback. A conventional PLD breaks
both rules at every crosspoint of its arrays, where one literal line feeds many AND gates. Here
each crosspoint is a reversible gate that copies the line: one copy goes on to the next
crosspoint, the other goes into the gate.

The RTL models this gate structure exactly: every gate is an instance of a small reversible-gate
module. The result is synthesizable, but what it describes is the structure, not an efficient FPGA
mapping. All devices are purely combinational, with no clock and no reset. Their outputs follow
the inputs after the gate delays.

## The gates

Only two primitive gates are used.

| gate | module | inputs | outputs |
|---|---|---|---|
| Feynman / CNOT | `feynman_gate` | A, B | P = A, Q = A xor B |
| Fredkin (controlled swap) | `fredkin_gate` | A, B, C | P = A; A=0: Q=B, R=C; A=1: Q=C, R=B |

Everything else is built from these two by tying some inputs to constants:

- **Copy** = Feynman with B = 0 (P = Q = A). This is the reversible replacement for fan-out.
- **Literal pair** = Feynman with B = 1 (P = I, Q = not I). There is one per device input.
- **Fixed connection** = a copy on a product line, used in the PAL's fixed OR plane. P carries
  the product on to the next output column, and Q feeds this column's OR gate.
- **`rev_mux`** = one Fredkin gate with inputs (E, OFF, X). Q = X when E = 1 and OFF when E = 0.
  The third output is garbage.
- **`rev_fuse`** = a copy followed by a `rev_mux`. P passes the line on to the next fuse, and Q
  is the line when the programming bit E is 1, or OFF when E is 0. This is the reversible
  programmable crosspoint.
- **`rev_and`** / **`rev_or`** = chains of Fredkin gates. With C = 0, output R is A AND B. With
  C = 1, output Q is A OR B. An N-input gate needs N-1 Fredkin gates.

Outputs that nothing uses are *garbage outputs*, which is normal in reversible design. Examples
are the spare Fredkin outputs, the last P of each fuse chain and the passed-through enables. In
the RTL they are left unconnected, so lint reports them as empty pins or unused bits. That is
expected.

## How the arrays are wired

`rev_and_plane` (used by both the PAL and the PLA):

```
 in[k] -> CNOT(B=1) -> true line (column 2k), complement line (column 2k+1)
 each column:  fuse[t=0] -P-> fuse[t=1] -P-> ... -P-> fuse[T-1] -P-> (garbage)
                  |Q            |Q                      |Q
 each row t:   rev_and over the 2N fuse Q outputs  ->  prod[t]
```

`rev_or_plane` (used by the PLA and the PROM) is the same thing turned through 90 degrees. Each
product line runs through one fuse per output, and output o ORs the Q outputs of its fuses.

The PAL's OR plane is fixed. Where the `OR_MAP` parameter has a 1, the product line passes
through a fixed-connection CNOT. Elsewhere the line just continues, and the OR input is tied
to 0.

### The off value of a fuse

The fuse's mux has one input grounded, so a disabled fuse outputs 0. That works for an OR plane,
because 0 does not change an OR. In an AND plane, however, a 0 would force the whole product to
0. The reference drawings avoid this: they place fuses only at the crosspoints the example uses,
with every enable tied to 1.

This RTL places a fuse at **every** crosspoint, so that the devices can really be programmed. AND
planes therefore use fuses whose off value is 1 (`rev_fuse #(.OFF(1))`), so a disabled crosspoint
drops its literal from the product. As a consequence:

- a term with no enabled fuse is constant 1;
- to make a term constant 0, enable both literals of one input.

Programming the example with its used crosspoints on and the rest off gives exactly the function
of the sparse drawing.

## Programming words and bit order

- `in[k]` is input I(k+1). Output `f[o]` is f(o+1).
- `and_en[t][c]` is the AND-plane bit for term t and literal column c. Column c = 2k is in[k];
  c = 2k+1 is NOT in[k]. 1 means connected.
- `or_en[o][t]` (PLA) connects term t to output o.
- `or_en[o][w]` (PROM) is bit o of the word stored at address w.

`rev_pld_pkg` holds the sizes and the worked example:

```
f1 = I1 I2 + I1 I3' + I1' I2 I3
f2 = I1 I2 + I1' I2 I3 + I1 I3
f3 = I1 I3' + I1 I2 I3
terms t0..t4 = I1I2, I1I3', I1'I2I3, I1I3, I1I2I3   (t0 and t2 are shared by f1 and f2)
```

`EXAMPLE_AND_EN` is the AND plane for these terms, and `EXAMPLE_OR_MAP` is the OR plane (the
PAL's `OR_MAP` default). For the input I1=1, I2=0, I3=1 the equations give f1 f2 f3 = 0 1 0.

## The devices

| module | AND array | OR array | default size |
|---|---|---|---|
| `rev_pal` | programmable (`and_en`) | fixed CNOT connections, `OR_MAP` parameter | 3 inputs, 5 terms, 3 outputs |
| `rev_pla` | programmable (`and_en`) | programmable (`or_en`) | 3 inputs, 5 terms, 3 outputs |
| `rev_prom` | fixed: `rev_decoder` (4-to-16) | programmable (`or_en`) | 4 address bits, 3 data bits |
| `rev_pld_top` | the three above, side by side, with `pal_`, `pla_` and `prom_` ports | | no parameters |

### Reversible decoder

`rev_decoder` is a binary tree of Fredkin gates with the enable at the root. At level j, each line
L of the level passes through a Fredkin gate controlled by address bit `in[N-1-j]`, with B = L and
C = 0:

- Q = L AND NOT bit goes to the "0" child;
- R = L AND bit goes to the "1" child.

The address bit is not fanned out. It travels along the level from one gate's P output to the
next, and the last P of each level is a garbage output. For N = 2 this gives the classic 2-to-4
decoder: three Fredkin gates, three constant 0 inputs and two garbage outputs. The default N = 4
gives 16 outputs from 15 gates. `out` is one-hot at the binary address when `e` = 1, and all zeros
when `e` = 0.

## Gate counts at the default sizes

The gate counts follow directly from the structure. The quantum costs use the commonly quoted
values of 1 for a Feynman gate and 5 for a Fredkin gate.

| device | Feynman | Fredkin | quantum cost | garbage outputs |
|---|---|---|---|---|
| `rev_pal` | 3 + 30 + 8 = 41 | 30 + 25 + 12 = 67 | 376 | 145 |
| `rev_pla` | 3 + 30 + 15 = 48 | 30 + 25 + 15 + 12 = 82 | 458 | 175 |
| `rev_prom` | 48 | 15 + 48 + 45 = 108 | 588 | 210 |

The garbage outputs are counted as follows:

- 2 per fuse (the passed-on enable and the spare mux output);
- 1 at the end of every fuse or connection chain;
- 2 per Fredkin gate in the AND and OR chains;
- N per decoder (the address bits at the ends of their chains).

For the PAL, for example: the AND plane has 60 + 6 + 50 = 116, the five product rows end in 5,
and the OR gates have 24, which gives 145.

The sparse arrays of the reference drawings, with fuses only where the example needs them, are
much cheaper. The full arrays here are the price of being able to program every crosspoint.

## Where this RTL departs from, or fills in, the original design

- There is a fuse at every crosspoint, with all enables brought out as ports, and the AND-plane
  off value is 1 (see above). The original drawings show one fixed programming.
- The insides of the reversible AND and OR gates are not specified in the source. Here they are
  Fredkin chains.
- The PROM is specified only as "decoder + programmable OR array". Its word width of 3 is a
  choice of this RTL.
- The decoder's bit order (the first stage decodes the MSB) is a choice of this RTL.
- In the source's array drawing, the third product term appears to take the complement of I2
  instead of I2. The printed equations use I2, and the RTL and the tests follow the equations.
- A reversible GAL is mentioned in the source but never described, so it is not provided. Gate
  delays given for an FPGA implementation are not modelled.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=N failures=M` line. For
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rev_pld_pkg.sv tb/tb_rev_pld_top.sv \
          --top-module tb_rev_pld_top -Mdir obj -o sim && obj/sim
```

| testbench | what it checks |
|---|---|
| `tb_feynman_gate`, `tb_fredkin_gate` | truth tables, one-to-one mapping, self-inverse |
| `tb_rev_mux`, `tb_rev_fuse` | both off values; a chain of three fuses on one line |
| `tb_rev_and`, `tb_rev_or` | exhaustive at 2, 3 and 6 (AND) or 5 (OR) inputs |
| `tb_rev_decoder` | 4-to-16 and 2-to-4, every address, enable on and off, garbage outputs |
| `tb_rev_pal`, `tb_rev_pla` | the example equations over all inputs; random programming against a sum-of-products model; the PLA also at 4x6x2 |
| `tb_rev_prom` | random contents, every address, enable on and off |
| `tb_rev_pld_top` | all three devices at full size, end to end |

`tb_rev_pld_top` also counts how often each mechanism occurs: a disabled AND fuse dropping a
literal, a disabled OR fuse blocking a true term, a fixed connection carrying a true term, a term
shared by two outputs, and a PROM read with the enable low. It fails if any of them never occurs.

Because the devices are combinational, each testbench waits 1 time unit after driving the inputs
before it compares the outputs.
