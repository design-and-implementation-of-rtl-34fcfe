// shifter_pkg: types and constants shared by the four-bit reversible shifter.
//
// The two select lines {S1,S0} choose one of four operations (function table
// of the shifter): 00 passes the word, 01 shifts right (the serial input IR
// enters at bit 4), 10 shifts left (the serial input IL enters at bit 1), and
// 11 clears the output. The gate and garbage counts of the two gate-level
// realisations are the published figures; the enum names are this design's own.
package shifter_pkg;

  typedef enum logic [1:0] {
    OP_PASS = 2'b00,  // O <- F
    OP_SHR  = 2'b01,  // O <- shr F
    OP_SHL  = 2'b10,  // O <- shl F
    OP_ZERO = 2'b11   // O <- 0
  } shift_op_e;

  // Garbage outputs of the two realisations. Design 1: twelve 3x3 TKS gates,
  // two garbage outputs each. Design 2: four 6x6 VSMT gates of five companion
  // outputs each, three of which are reused as the next gate's S1 input.
  localparam int unsigned TKS_GARBAGE  = 24;
  localparam int unsigned VSMT_GARBAGE = 17;

  // Reference behaviour of the shifter, used by the testbenches.
  // Bits are numbered 4 (most significant) down to 1, as in the schematics.
  function automatic logic [4:1] shift_ref(input logic [4:1] f, input logic ir,
                                           input logic il, input shift_op_e op);
    unique case (op)
      OP_PASS: return f;
      OP_SHR:  return {ir, f[4:2]};
      OP_SHL:  return {f[3:1], il};
      default: return 4'b0000;
    endcase
  endfunction

endpackage
