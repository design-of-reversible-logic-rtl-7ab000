# Reversible code converters in SystemVerilog

A reversible gate maps its input vector to its output vector one-to-one.
Nothing is erased inside it, so its inputs can always be worked out again
from its outputs. That matters for low-power and quantum circuits. It has a
price. A reversible network may not fan a signal out or feed one back.
Constant 0 or 1 inputs have to be added wherever a plain function (copy,
NOT, AND, OR) is wanted. Outputs that the function does not need still
exist and leave the circuit as *garbage*.

This RTL builds four 4-bit code converters as networks of only two
reversible gates:

| converter | function | gates | constant inputs | garbage outputs |
|---|---|---|---|---|
| `bin2gray` | binary to Gray | 3 FG | 0 | 3 |
| `gray2bin` | Gray to binary | 5 FG | 2 | 3 |
| `bcd2xs3` | BCD digit to excess-3 | 5 URG + 3 FG | 8 | 12 |
| `xs32bcd` | excess-3 to BCD digit | 5 URG + 3 FG | 8 | 12 |

It also includes the usual library of small reversible gates. Only two of
them are used by the converters.

Everything is combinational. There is no clock, no reset and no state. Each
gate is its own module, and the converters instantiate them gate by gate,
so the netlist has the same structure as the reversible circuit. Garbage
outputs are brought out as ports rather than left dangling. Constant inputs
are tied inside the converter.

## The gates

| module | size | outputs |
|---|---|---|
| `feynman_gate` (FG) | 2x2 | P = A, Q = A ^ B |
| `urg_gate` (URG) | 3x3 | P = C ^ AB, Q = B, R = C ^ (A + B) |
| `toffoli_gate` (TG) | 3x3 | P = A, Q = B, R = AB ^ C |
| `fredkin_gate` (FRG) | 3x3 | P = A, Q = A'B ^ AC, R = A'C ^ AB (B and C swap when A = 1) |
| `peres_gate` (PG) | 3x3 | P = A, Q = A ^ B, R = AB ^ C |
| `hng_gate` (HNG) | 4x4 | P = A, Q = B, R = A ^ B ^ C, S = (A ^ B)C ^ AB ^ D |

The converters get everything from FG and URG by tying one input to a
constant:

* FG(x, 0) gives two copies of x. This is the only legal way to fan a
  signal out.
* FG(x, 1) gives x and NOT x.
* URG(a, b, 0) gives AND on P and OR on R.
* URG(a, 1, c) gives a ^ c on P and NOT c on R.

## Gray code converters

**Binary to Gray (`bin2gray`).** Gray bit i is `bin[i] ^ bin[i+1]`, and the
MSB passes through. Each XOR is one Feynman gate. Its control is the more
significant bit and its target is the bit itself. The control output is a
copy of the control bit and goes to garbage.

**Gray to binary (`gray2bin`).** Binary bit i is the XOR of all Gray bits
from the MSB down to bit i. This is a running XOR that ripples towards the
LSB. Each step is one Feynman gate: the running XOR is the control and the
next Gray bit is the target. The running XOR is needed twice: as an output
bit, and as the control of the next step. Because fan-out is not allowed, a
second Feynman gate with its target tied to 0 makes the copy. The last step
needs no copy.

Both modules take a `WIDTH` parameter, which defaults to 4. A WIDTH-bit
converter uses WIDTH-1 XOR gates, plus WIDTH-2 copy gates for Gray to
binary. The 4-bit circuits are the reference design. The generalisation
follows the same pattern.

**Letter order.** The drawn circuits name the inputs A..D and the outputs
W..Z, and the two Gray circuits use opposite letter orders:

* In the binary to Gray circuit, A is the MSB and passes to W.
* In the Gray to binary circuit, D is the MSB and passes to Z.

The RTL uses vectors whose bit `[WIDTH-1]` is always the MSB. In
`bin2gray`, `bin[3]` is A. In `gray2bin`, `gray[3]` is D. The vectors
therefore chain directly: `gray2bin(bin2gray(v)) == v`. The module headers
list which letter is which bit.

## BCD and excess-3 converters

Excess-3 codes a decimal digit n as the binary value n + 3. Take the 4-bit
input as A (MSB), B, C, D (LSB).

**BCD to excess-3 (`bcd2xs3`)** computes

    W = A ^ B(C+D)     X = B ^ (C+D)     Y = ~(C ^ D)     Z = ~D

W should be A + B(C+D). For a valid digit, A = 1 forces B = 0, so the two
terms are never 1 together and XOR gives the same result as OR.

| gate | function | gives |
|---|---|---|
| `u_or` | URG(C, D, 0) | C + D |
| `u_copy` | FG(C+D, 0) | two copies of C + D |
| `u_and` | URG(B, C+D, 0) | B(C+D) |
| `u_w` | URG(A, 1, B(C+D)) | W |
| `u_x` | URG(B, 1, C+D) | X |
| `u_xy` | URG(C, 1, D) | C ^ D |
| `u_y` | FG(C^D, 1) | Y, on its inverting output |
| `u_z` | FG(D, 1) | Z, on its inverting output |

**Excess-3 to BCD (`xs32bcd`)** computes

    W = A(B + CD)      X = B ^ ~(CD)     Y = C ^ D          Z = ~D

| gate | function | gives |
|---|---|---|
| `u_and` | URG(C, D, 0) | CD |
| `u_split` | FG(CD, 1) | CD and ~(CD) |
| `u_or` | URG(B, CD, 0) | B + CD, on R |
| `u_w` | URG(A, B+CD, 0) | W |
| `u_x` | URG(B, 1, ~(CD)) | X |
| `u_xy` | URG(C, 1, D) | C ^ D |
| `u_y` | FG(C^D, 1) | Y, on its copy output |
| `u_z` | FG(D, 1) | Z |

Inputs that are not valid codes are not given a meaning: BCD 10-15, and
excess-3 0-2 and 13-15. They produce whatever the network produces. The
network is still reversible on them: every 4-bit input gives a different
output-plus-garbage vector.

Garbage bit k-1 is garbage output G*k* of the published drawing. In
`bcd2xs3`, bit 11 is the unused R output of `u_w`. Some garbage bits are
constants (the Q = B = 1 outputs of the URGs), and some are copies of
inputs. A synthesis tool reports these as idle outputs. They are kept
because they are part of the reversible circuit.

## Where this RTL departs from the published circuits

* **Y of excess-3 to BCD.** The published drawing takes Y from the
  inverting output of its last Feynman gate. That gives Y = ~(C ^ D), which
  is wrong: code 0011 would come out as 0010 instead of 0000. Here Y is
  taken from the gate's other output, the copy. Gate, constant and garbage
  counts do not change. If the inverting output is used instead, the
  testbench reports 10 failing checks.
* **Which pin is the control.** The drawings do not say which input of each
  gate is the control. Where the drawn position of an output could not give
  the needed function, the pins were chosen so that it does. This applies
  mainly to the last Feynman gate of Gray to binary, whose W output must be
  the XOR output.
* **WIDTH.** The `WIDTH` generalisation of the Gray converters is an
  addition.
* **Gate library.** The Toffoli, Fredkin, Peres and HNG gates are provided
  for completeness. The converters do not use them.

## Top level

`rev_code_converters_top` places the four converters side by side. Each has
its own ports, and every garbage output is brought out. All six gates share
one 4-bit input, `gate_in = {A, B, C, D}`, and each has its own output
vector, MSB = P. The only parameter is `GRAY_WIDTH` (default 4).
`rev_pkg` holds the gate, constant and garbage counts of the four
converters and the `nibble_t` type.

## Verification

Each module has a self-checking testbench in `tb/tb_<module>.sv`. Each
testbench ends with one line, `TB_RESULT checks=N failures=M`.

* **Gates.** Every input pattern is checked against a truth table or a
  behavioural model, and all outputs must be distinct.
* **Gray converters.** Checked at WIDTH 4 and 6 against `v ^ (v >> 1)`.
  Successive Gray codes must differ in one bit, and the garbage bits are
  checked too.
* **BCD/excess-3 converters.** Checked against n + 3 and n - 3. All 16
  inputs must give distinct output-plus-garbage vectors.
* **Top.** `tb_rev_code_converters_top` runs at default parameters. It
  drives all inputs, does Gray and BCD round trips, checks every gate, and
  counts how often each mechanism occurred. A mechanism that never happened
  counts as a failure. The counted mechanisms are: a single-bit Gray step, a
  round trip, FG copy, FG inversion, Toffoli flip, Fredkin swap and HNG
  carry.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/rev_pkg.sv \
        tb/tb_rev_code_converters_top.sv --top-module tb_rev_code_converters_top
    ./obj_dir/Vtb_rev_code_converters_top

Replace the testbench name to run another block. `rtl/rev_pkg.sv` must come
first on the command line, because the converters and several testbenches
import it.
