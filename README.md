# Four-bit binary shifter from reversible logic gates

A reversible gate has as many outputs as inputs, and its input can be recovered
from its output. In principle such a gate can switch without losing
information. This design builds a small combinational shifter, the kind that
sits in an ALU or a shift register, entirely from reversible gates. A shifter
is just a 4:1 multiplexer per output bit. So the whole design comes down to
building 4:1 multiplexers from reversible gates with as few gates, and as few
unused gate outputs ("garbage"), as possible.

Two gate-level realisations are provided. Both compute the same function:

| realisation              | gates              | garbage outputs | logic depth |
|--------------------------|--------------------|-----------------|-------------|
| VSMT (default)           | 4 × 6-in/6-out     | 17              | 1 gate      |
| TKS (`USE_TKS_DESIGN=1`) | 12 × 3-in/3-out    | 24              | 2 gates     |

The VSMT version uses fewer gates and produces less garbage, so it is the default.

## What it computes

The data bits are numbered 4 (most significant) down to 1. The select lines
`s1`,`s0` choose the operation:

| s1 s0 | operation   | o[4] | o[3] | o[2] | o[1] |
|-------|-------------|------|------|------|------|
| 0 0   | pass        | i4   | i3   | i2   | i1   |
| 0 1   | shift right | ir   | i4   | i3   | i2   |
| 1 0   | shift left  | i3   | i2   | i1   | il   |
| 1 1   | clear       | 0    | 0    | 0    | 0    |

`ir` and `il` are the bits shifted in at the two ends. With `ir = il = 0`
this is a logical shift. Tie `ir` to `i[4]` for an arithmetic right shift, or
tie the serial inputs to the bit leaving at the other end for a rotate.

The circuit is purely combinational. It has no clock and no reset, and the
outputs follow the inputs after one gate delay (VSMT) or two (TKS).

## The gates

**VSMT gate** (`vsmt_gate`, 6 inputs A–F, 6 outputs P–U):

    P = E'(A F' + B F) + E(C F' + D F)     4:1 mux, select {E,F}
    Q = A ^ B ^ C      R = E ^ F      S = C ^ D
    T = D ^ E ^ F      U = E

P is the useful output. U is a copy of the high select E, and the shifter uses
it to carry S1 from one gate to the next.

Note that with these equations the gate is **not** strictly one-to-one. When
E = 1, inputs A and B appear at the outputs only as A ^ B, in Q. The RTL keeps
the equations as specified. So the VSMT shifter computes the correct function,
but its outputs plus garbage do not fully determine its inputs. The TKS
version does not have this issue, and its testbench checks that property.

**TKS gate** (`tks_gate`, 3 inputs A–C, 3 outputs P–R):

    P = A C' + B C     2:1 mux, C selects B
    Q = A ^ B ^ C
    R = A C + B C'     the opposite choice

This gate is a bijection on its three bits.

## VSMT realisation (`shifter_vsmt`)

Each output bit k has one VSMT gate. The gate's multiplexer inputs are laid
out in select order:

| pin | select {S1,S0} | signal for bit k                            |
|-----|----------------|---------------------------------------------|
| A   | 00             | i[k]                                        |
| B   | 01             | i[k+1] (for bit 4: `ir`)                    |
| C   | 10             | i[k-1] (for bit 1: `il`)                    |
| D   | 11             | constant 0                                  |
| E   | —              | S1: the primary input for the O4 gate, otherwise U of the gate above |
| F   | —              | S0, shared by all four gates                |

S1 goes into the top gate only, and each gate passes its U output to the gate
below. Three of the 20 companion outputs are reused this way. That leaves
4 + 4 + 4 + 5 = 17 garbage bits: Q, R, S and T of every gate, plus U of the
bottom gate. S0 and the constant 0 are shared by all four gates rather than
copied through extra gates.

The pin order of the top two gates is taken from the published schematic. The
lower two gates are assumed to follow the same pattern. Any other ordering
would only change which garbage bit carries which value, not the shift
result.

`garbage` layout: `garbage[4*(4-k) +: 4] = {T, S, R, Q}` of the gate for bit k
(O4's gate at bits 3:0), and `garbage[16]` = U of the O1 gate (a copy of S1).
Some garbage bits are plain copies of inputs: S = i[k-1] because D = 0, and
garbage[16] = s1. Synthesis reports these as wires.

## TKS realisation (`shifter_tks`)

Each output bit uses three TKS gates arranged as a two-level mux tree. At the
first level, one gate chooses `i[k]` or its left neighbour (pass or shift
right) with S0. A second gate chooses the right neighbour or 0 (shift left or
clear) with S0. A third gate then chooses between the two with S1. Every gate
leaves Q and R as garbage, giving 24 bits. The first-level gates come first
in the layout: `garbage[4*(4-k) +: 4] = {R_hi, Q_hi, R_lo, Q_lo}`, then
`garbage[16 + 2*(4-k) +: 2] = {R_out, Q_out}`.

## Top level (`rev_shifter4`)

| port      | dir | width       | meaning                                   |
|-----------|-----|-------------|-------------------------------------------|
| `i`       | in  | `[4:1]`     | data word                                 |
| `ir`      | in  | 1           | bit entering o[4] on shift right          |
| `il`      | in  | 1           | bit entering o[1] on shift left           |
| `s1`,`s0` | in  | 1 each      | operation select                          |
| `o`       | out | `[4:1]`     | result                                    |
| `garbage` | out | `GARBAGE_W` | unused gate outputs (17, or 24 with TKS)  |

Parameter `USE_TKS_DESIGN` (bit, default 0) selects the realisation.
`GARBAGE_W` is derived from it. The garbage bus is brought out so that no gate
output is left dangling. Leave it unconnected if you only need the shift.
`shifter_pkg` holds the `shift_op_e` enum (`OP_PASS`, `OP_SHR`, `OP_SHL`,
`OP_ZERO`), the garbage widths, and `shift_ref()`, a reference model that the
testbenches use.

## How far to trust it

- The gate equations, gate counts (4 and 12), garbage counts (17 and 24) and
  the function table are all as specified. The testbenches check every one.
- The published simulation applies `i = 1111`, `ir = il = 0` and steps the
  select through 00, 01, 10, 11. The outputs are 1111, 0111, 1110, 0000. The
  top-level testbenches replay exactly this sequence.
- These points are this design's own choices: the assignment of garbage
  labels to bit positions, the pin order of the lower VSMT gates, the pairing
  of inputs on the first-level TKS gates, and the sharing of S0 and the
  constant 0. None of them affects `o`.
- The VSMT gate is not fully reversible as specified (see above).
- The original implementation was synthesised for a Spartan-3E FPGA at
  200 MHz. The design has no registers, so no timing is modelled or checked.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and finishes. For example, with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/shifter_pkg.sv tb/tb_rev_shifter4.sv --top-module tb_rev_shifter4
    ./obj_dir/Vtb_rev_shifter4

| testbench             | what it covers                                            |
|-----------------------|-----------------------------------------------------------|
| `tb_vsmt_gate`        | all 64 inputs, all six outputs                            |
| `tb_tks_gate`         | all 8 inputs, all outputs, bijectivity                    |
| `tb_shifter_vsmt`     | all 256 inputs: result and every garbage bit              |
| `tb_shifter_tks`      | all 256 inputs: result, garbage width, no two inputs alike |
| `tb_rev_shifter4`     | default top: published waveform plus all 256 inputs; counts each operation and each serial fill |
| `tb_rev_shifter4_tks` | the same, with the TKS realisation selected               |
