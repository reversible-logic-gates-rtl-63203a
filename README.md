# Reversible 4-bit code converters

A reversible gate maps its input patterns one-to-one onto its output patterns,
so no information is destroyed inside it. Landauer's principle ties a minimum
energy cost to each bit that is erased. Circuits built from reversible gates
therefore avoid that cost in principle, which makes them of interest for
low-power, optical and quantum logic. The price is structure. Every gate has
as many outputs as inputs. Values a function needs but does not compute
directly enter as **constant inputs** (tied to 0 or 1). Outputs nobody uses
leave the circuit as **garbage outputs**. A reversible circuit is judged by its
gate count, constant inputs and garbage outputs.

This RTL describes four small code converters of that kind. All four are built
only from two reversible gates, the Feynman gate and the URG:

| converter | module | input codes | gates | constants | garbage |
|---|---|---|---|---|---|
| binary → Gray | `bin2gray` | 0–15 | 3 FG | 0 | 3 |
| Gray → binary | `gray2bin` | 0–15 | 5 FG | 2 | 3 |
| BCD → Excess-3 | `bcd2xs3` | digits 0–9 | 5 URG + 3 FG | 8 | 12 |
| Excess-3 → BCD | `xs32bcd` | codes 3–12 | 5 URG + 3 FG | 8 | 12 |

`code_converter_top` places the four side by side. They share nothing, and the
top adds no logic.

Everything is combinational: there is no clock, no reset and no state. The RTL
models the logic function and the gate-level structure of each reversible
network. It says nothing about how the energy savings would be achieved
physically. A synthesis tool will flatten the gates into ordinary
XOR/AND/OR/NOT logic. To study the reversible structure, read the gate
instances in each module, not the synthesized netlist.

## The two gates

**Feynman gate (FG, `fg_gate`)**, 2 inputs and 2 outputs, also called
controlled-NOT:

    P = A
    Q = A xor B

The converters use it in three roles:
- as an XOR;
- as a **copy** (B tied to 0: both outputs equal A), which is how a
  reversible circuit gets a fan-out;
- as an **inverter** (B tied to 1: Q = NOT A).

| A | B | P | Q |
|---|---|---|---|
| 0 | 0 | 0 | 0 |
| 0 | 1 | 0 | 1 |
| 1 | 0 | 1 | 1 |
| 1 | 1 | 1 | 0 |

**Universal Reversible Gate (URG, `urg_gate`)**, 3 inputs and 3 outputs:

    P = C xor (A and B)
    Q = B
    R = C xor (A or B)

With C tied to 0, P is A AND B and R is A OR B. With C tied to 1 they become
NAND and NOR. With C driven by a signal, the gate adds an XOR for free. B always
passes through on Q.

| A B C | P Q R |
|---|---|
| 000 | 000 |
| 001 | 101 |
| 010 | 011 |
| 011 | 110 |
| 100 | 001 |
| 101 | 100 |
| 110 | 111 |
| 111 | 010 |

## Line names and bit order

Each converter has a 4-bit `code_in`, a 4-bit `code_out` and a `garbage` bus.
The input lines are called A, B, C, D and the output lines W, X, Y, Z. **A and
W are the most significant bits:**

    code_in  = {A, B, C, D}
    code_out = {W, X, Y, Z}

The type `code4_t` and the cost figures of each converter (`rev_cost_t`:
gates, constants, garbage) are in `code_conv_pkg`. Each module sizes its
`garbage` port from its entry there.

## Binary ↔ Gray

Gray code changes exactly one bit between consecutive values.

**`bin2gray`.** The most significant bit passes straight through. Every other
bit is the XOR of two neighbouring binary bits:

    W = A    X = A^B    Y = B^C    Z = C^D

There is one Feynman gate per XOR, with the more significant line as control.
That line is also wired on to its own output or to the next gate. Each gate's
P output is a copy of its control line and is garbage (G1..G3). Cost: 3 gates,
0 constants, 3 garbage.

**`gray2bin`.** Going back, each binary bit is the Gray bit XORed with the
binary bit above it. The result ripples down from the MSB:

    W = A    X = W^B    Y = X^C    Z = Y^D

X and Y are each needed twice: once as an output and once as an operand of the
next XOR. A Feynman gate with a constant-0 input makes the second copy. The
circuit is therefore a chain of five gates, XOR / copy / XOR / copy / XOR. It
has two constant inputs, and the three XOR gates' pass-through outputs are
garbage. The ripple is five gates deep, which is the longest path of the four
converters.

## BCD ↔ Excess-3

Excess-3 encodes a decimal digit n as n + 3 in four bits. It is
self-complementing, which simplifies decimal subtraction.

### `bcd2xs3`

For a BCD digit, adding 3 reduces to:

    W = A ^ B(C+D)
    X = B ^ (C+D)
    Y = ~(C ^ D)
    Z = ~D

For digits 0–9, A and B(C+D) are never both 1, so the XOR in W acts as the
carry OR. The network:

| gate | computes | used output | garbage |
|---|---|---|---|
| URG(C, D, 0) | C+D on R | R | P, Q (G7, G8) |
| FG(C+D, 0) | two copies of C+D (the buffer) | P, Q | — |
| URG(B, C+D, 0) | B(C+D) on P | P | Q, R (G3, G4) |
| URG(A, 1, B(C+D)) | W on P | P | Q, R (G1, G2) |
| URG(B, 1, C+D) | X on P | P | Q, R (G5, G6) |
| URG(C, 1, D) | C^D on P | P | Q, R (G10, G11) |
| FG(C^D, 1) | Y on Q | Q | P (G9) |
| FG(D, 1) | Z on Q | Q | P (G12) |

### `xs32bcd`

For the Excess-3 codes 3–12, subtracting 3 reduces to:

    W = A(B + CD)
    X = ~(B ^ CD)
    Y = C ^ D
    Z = ~D

| gate | computes | used output | garbage |
|---|---|---|---|
| URG(C, D, 0) | CD on P | P | Q, R (G5, G6) |
| FG(CD, 1) | CD and ~CD | P, Q | — |
| URG(B, CD, 0) | B+CD on R | R | P, Q (G3, G4) |
| URG(A, B+CD, 0) | W on P | P | Q, R (G1, G2) |
| URG(B, 1, ~CD) | X on P | P | Q, R (G7, G8) |
| URG(C, 1, D) | C^D on P | P | Q, R (G9, G10) |
| FG(C^D, 0) | Y on Q (buffer) | Q | P (G11) |
| FG(D, 1) | Z on Q | Q | P (G12) |

In both networks the `garbage` bus carries G1..G12 in bits 0..11.

Invalid input codes (10–15 into `bcd2xs3`; 0–2 and 13–15 into `xs32bcd`) give
whatever the equations produce. They are not flagged.

## Where this RTL departs from the circuits it reproduces

The gate structure and the gate, constant and garbage counts follow the
reference circuits for these converters. Four points differ, and they are the
places to look first when comparing with other published versions:

1. **Bit order of Gray → binary.** The reference binary→Gray and BCD/Excess-3
   circuits treat line A as the MSB. The reference Gray→binary circuit passes D
   straight through and ripples up toward A, which treats D as the MSB. Read in
   a single bit order, the two Gray circuits would not undo each other. Here
   the Gray→binary chain is mirrored so that A is the MSB everywhere and
   `gray2bin(bin2gray(x)) == x`. The gate count and the constants are
   unchanged.
2. **Gray → binary, last gate.** The reference drawing routes the pass-through
   output of the last Feynman gate to W. Here the XOR output carries the result.
3. **BCD → Excess-3, first URG.** The reference takes the URG's P output
   (C AND D) into the buffer. The conversion needs C OR D, which is the same
   gate's R output, and the reference's own operation count (one OR, one AND)
   agrees with that. Taken literally, the reference gives a wrong X for digits
   1, 2, 5, 6 and 9 and a wrong W for digits 5 and 6.
4. **Excess-3 → BCD, Y.** The reference ties the second input of the Feynman
   gate that drives Y to 1, which inverts Y and is wrong for every code. Here
   it is tied to 0, so the gate is a buffer. The constant count stays 8, but
   the circuit has two inversions where the reference's operation count lists
   three.

A converter wired as in the literal reading of point 3 or point 4 fails its
testbench.

**Fan-out.** The reference BCD/Excess-3 circuits (and the binary→Gray circuit)
send some primary input lines to more than one gate. That violates the strict
no-fan-out rule of reversible logic. The RTL keeps that structure. As a
result, the constant and garbage counts above are the reference's figures,
not those of a fan-out-free version. The full output vector
`{code_out, garbage}` of every converter is still different for each of the 16
input codes. The inputs can therefore always be recovered from the outputs,
and the testbenches check this. Many garbage lines carry a constant (a URG's Q
output when B is tied to 1) or a plain copy of an input. Synthesis reports
them as idle outputs; that is expected for this kind of circuit.

**Not included.** Other well-known reversible gates (Toffoli, Fredkin, Peres,
HNG) are not needed by these converters and are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:
- ends with a `TB_RESULT checks=N failures=M` line;
- has a watchdog that stops the run and counts a failure if the stimulus
  never finishes.

| testbench | what it checks |
|---|---|
| `tb_fg_gate`, `tb_urg_gate` | all input patterns against the truth tables above; that the outputs are a permutation (reversibility) |
| `tb_bin2gray`, `tb_gray2bin`, `tb_bcd2xs3`, `tb_xs32bcd` | every valid input against an arithmetic model in the testbench (x^(x>>1), prefix XOR, +3, −3); that `{code_out, garbage}` differs for all 16 inputs |
| `tb_code_converter_top` | binary 0–15 → Gray → binary round trip, with each Gray step changing one bit (15→0 included); digits 0–9 → Excess-3 → BCD round trip; counts each kind of conversion and fails if any never happened |

All testbenches run with the design's defaults. The design has no parameters
to scale.

Running one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/code_conv_pkg.sv tb/tb_code_converter_top.sv --top-module tb_code_converter_top
    ./obj_dir/Vtb_code_converter_top

Replace the testbench name to run another one. The package file must be listed
first, because the converters import it.

## Files

- `rtl/code_conv_pkg.sv`: code word type, cost record and per-converter
  figures.
- `rtl/fg_gate.sv`, `rtl/urg_gate.sv`: the two reversible gates.
- `rtl/bin2gray.sv`, `rtl/gray2bin.sv`, `rtl/bcd2xs3.sv`, `rtl/xs32bcd.sv`:
  the converters.
- `rtl/code_converter_top.sv`: all four side by side.
- `tb/tb_<module>.sv`: one testbench per module.
