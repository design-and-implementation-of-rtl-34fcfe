// vsmt_gate: the 6x6 VSMT reversible gate.
//
// Output P is a 4:1 multiplexer: E (high-order select) and F (low-order
// select) pick A (EF=00), B (01), C (10) or D (11). The other five outputs
// carry the remaining input information: Q = A^B^C, R = E^F, S = C^D,
// T = D^E^F and U = E, a copy of the high-order select that a following gate
// can reuse. The output equations are the published ones for this gate.
// As written, the map is not one-to-one when E=1: A and B then reach the
// outputs only through their XOR in Q. The equations are kept as given.
//
// Purely combinational, no clock; all ports are single bits.
module vsmt_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  input  logic f,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t,
  output logic u
);

  always_comb begin
    p = (~e & ((a & ~f) | (b & f))) | (e & ((c & ~f) | (d & f)));
    q = a ^ b ^ c;
    r = e ^ f;
    s = c ^ d;
    t = d ^ e ^ f;
    u = e;
  end

endmodule
