// shifter_tks: four-bit combinational shifter from twelve TKS gates
// ("Design 1", the first of the two published realisations).
//
// Each output bit O[k] is a 4:1 multiplexer built as two levels of TKS 2:1
// multiplexers. On the first level, one gate picks I[k] or the left
// neighbour (IR for k=4) with S0, another picks the right neighbour (IL for
// k=1) or constant 0 with S0; on the second level a third gate picks between
// the two with S1. Each gate leaves its Q and R outputs as garbage: 12 gates,
// 24 garbage bits, as published. Which first-level gate holds which pair of
// inputs is read from the schematic; the function follows the shifter's
// function table either way.
//
// garbage[23:0] holds, per output bit k (O4 first), the Q and R outputs of the
// two first-level gates (bits 4*(4-k) +: 4) and then, from bit 16 upwards,
// the Q and R outputs of the second-level gates (bits 16+2*(4-k) +: 2), which
// follows the schematic's G1..G16 and G17..G24 numbering.
//
// Ports as shifter_vsmt. Purely combinational: two gate delays from input to
// output.
module shifter_tks
  import shifter_pkg::*;
(
  input  logic [4:1] i,
  input  logic       ir,
  input  logic       il,
  input  logic       s1,
  input  logic       s0,
  output logic [4:1] o,
  output logic [TKS_GARBAGE-1:0] garbage
);

  logic [5:0] ext;
  assign ext = {ir, i, il};  // ext[5]=IR, ext[4:1]=I4..I1, ext[0]=IL

  logic [4:1] m_lo, m_hi;           // first-level results for S1=0 and S1=1
  logic [4:1] q_lo, r_lo, q_hi, r_hi, q_out, r_out;

  for (genvar k = 4; k >= 1; k--) begin : g_bit
    // S1=0 half: pass (S0=0) or shift right (S0=1)
    tks_gate u_lo (
      .a (ext[k]), .b (ext[k+1]), .c (s0),
      .p (m_lo[k]), .q (q_lo[k]), .r (r_lo[k])
    );
    // S1=1 half: shift left (S0=0) or clear (S0=1)
    tks_gate u_hi (
      .a (ext[k-1]), .b (1'b0), .c (s0),
      .p (m_hi[k]), .q (q_hi[k]), .r (r_hi[k])
    );
    // second level, selected by S1
    tks_gate u_out (
      .a (m_lo[k]), .b (m_hi[k]), .c (s1),
      .p (o[k]), .q (q_out[k]), .r (r_out[k])
    );
    assign garbage[4*(4-k) +: 4]       = {r_hi[k], q_hi[k], r_lo[k], q_lo[k]};
    assign garbage[16 + 2*(4-k) +: 2]  = {r_out[k], q_out[k]};
  end

endmodule
