// shifter_vsmt: four-bit combinational shifter from four VSMT gates
// (the optimised realisation, "Design 2").
//
// One VSMT gate produces each output bit O[k]: its 4:1 multiplexer takes
// A = I[k] (pass), B = the bit on its left (shift right; IR for k=4),
// C = the bit on its right (shift left; IL for k=1) and D = constant 0
// (clear), with E = S1 and F = S0. S1 enters the top gate only; each gate
// passes its U output (a copy of E) down to the next gate as that gate's E,
// so of the 4 x 5 companion outputs three are reused and 17 remain as
// garbage, matching the published count. S0 and the constant 0 are shared by
// all four gates as in the schematic.
//
// garbage[16:0] is G17..G1 (garbage[0] = G1): per gate, in order, Q, R, S, T;
// the bottom gate (O1) adds its U as G17. The exact ordering of the printed
// G labels over the outputs of a gate is this design's choice.
//
// Ports: i[4:1] data, ir/il serial fill bits, s1/s0 operation select,
// o[4:1] result. Purely combinational: the output follows the inputs after
// one gate delay.
module shifter_vsmt
  import shifter_pkg::*;
(
  input  logic [4:1] i,
  input  logic       ir,
  input  logic       il,
  input  logic       s1,
  input  logic       s0,
  output logic [4:1] o,
  output logic [VSMT_GARBAGE-1:0] garbage
);

  // Data fed to each gate: neighbour bits with the serial inputs at the ends.
  logic [5:0] ext;
  assign ext = {ir, i, il};  // ext[5]=IR, ext[4:1]=I4..I1, ext[0]=IL

  // Select S1 as it is handed from gate to gate: sel[4] = S1 at the top gate.
  logic [4:0] sel;
  assign sel[4] = s1;

  logic [4:1] q, r, s, t;

  for (genvar k = 4; k >= 1; k--) begin : g_bit
    vsmt_gate u_gate (
      .a (ext[k]),
      .b (ext[k+1]),
      .c (ext[k-1]),
      .d (1'b0),
      .e (sel[k]),
      .f (s0),
      .p (o[k]),
      .q (q[k]),
      .r (r[k]),
      .s (s[k]),
      .t (t[k]),
      .u (sel[k-1])
    );
    // Gate for O[k] is the (5-k)-th from the top: its garbage starts at 4*(4-k).
    assign garbage[4*(4-k) +: 4] = {t[k], s[k], r[k], q[k]};
  end

  assign garbage[16] = sel[0];

endmodule
