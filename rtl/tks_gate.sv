// tks_gate: the 3x3 TKS reversible gate.
//
// With C as select, P = A.C' + B.C passes A when C=0 and B when C=1, and
// R = A.C + B.C' is the complementary choice; Q = A^B^C. The gate is a
// bijection on its three bits. The output equations are the published ones
// for this gate.
//
// Purely combinational, no clock; all ports are single bits.
module tks_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = (a & ~c) | (b & c);
    q = a ^ b ^ c;
    r = (a & c) | (b & ~c);
  end

endmodule
