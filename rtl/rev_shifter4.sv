// rev_shifter4: four-bit reversible-logic binary shifter, top level.
//
// Four operations are chosen by {S1,S0}: 00 pass, 01 shift right (IR enters
// at bit 4), 10 shift left (IL enters at bit 1), 11 clear. By default the
// shifter is the optimised realisation from four VSMT gates (17 garbage
// outputs); setting USE_TKS_DESIGN selects the first realisation from twelve
// TKS gates (24 garbage outputs) instead. Both compute the same function;
// they differ in gate count, garbage count and logic depth.
//
// Ports: i[4:1] data word (i[4] most significant), ir and il serial fill
// bits, s1/s0 operation select, o[4:1] result, garbage[] the reversible
// gates' unused outputs, brought out so that every gate output stays
// observable as the reversible style requires. GARBAGE_W is derived, not set.
// Purely combinational: no clock and no reset.
module rev_shifter4
  import shifter_pkg::*;
#(
  parameter bit          USE_TKS_DESIGN = 1'b0,
  localparam int unsigned GARBAGE_W      = USE_TKS_DESIGN ? TKS_GARBAGE : VSMT_GARBAGE
) (
  input  logic [4:1]           i,
  input  logic                 ir,
  input  logic                 il,
  input  logic                 s1,
  input  logic                 s0,
  output logic [4:1]           o,
  output logic [GARBAGE_W-1:0] garbage
);

  if (USE_TKS_DESIGN) begin : g_tks
    shifter_tks u_shifter (
      .i (i), .ir (ir), .il (il), .s1 (s1), .s0 (s0),
      .o (o), .garbage (garbage)
    );
  end else begin : g_vsmt
    shifter_vsmt u_shifter (
      .i (i), .ir (ir), .il (il), .s1 (s1), .s0 (s0),
      .o (o), .garbage (garbage)
    );
  end

endmodule
