// tb_shifter_vsmt: exhaustive self-checking test of the four-VSMT-gate shifter.
//
// All 256 combinations of data, serial inputs and select are applied. The
// result is compared with a bit-by-bit model of the function table, and the
// 17 garbage bits with what each gate's companion outputs must carry,
// including the copy of S1 handed from gate to gate and leaving the last
// gate as G17.
module tb_shifter_vsmt;
  import shifter_pkg::*;

  logic [4:1] i, o;
  logic       ir, il, s1, s0;
  logic [VSMT_GARBAGE-1:0] garbage;
  int checks   = 0;
  int failures = 0;

  shifter_vsmt dut (.*);

  function automatic logic [4:1] model(input logic [4:1] f, input logic r_in,
                                       input logic l_in, input logic [1:0] sel);
    logic [4:1] m;
    for (int k = 1; k <= 4; k++) begin
      case (sel)
        2'b00: m[k] = f[k];
        2'b01: m[k] = (k == 4) ? r_in : f[k+1];
        2'b10: m[k] = (k == 1) ? l_in : f[k-1];
        2'b11: m[k] = 1'b0;
      endcase
    end
    return m;
  endfunction

  initial begin
    logic [5:0] ext;
    logic [VSMT_GARBAGE-1:0] g_exp;
    checks++;
    if ($bits(garbage) != 17) begin
      failures++;
      $display("FAIL garbage width %0d, expected 17", $bits(garbage));
    end
    for (int n = 0; n < 256; n++) begin
      {i, ir, il, s1, s0} = 8'(n);
      #1;
      checks++;
      if (o !== model(i, ir, il, {s1, s0})) begin
        failures++;
        $display("FAIL out: i=%b ir=%b il=%b s=%b%b got %b expected %b",
                 i, ir, il, s1, s0, o, model(i, ir, il, {s1, s0}));
      end
      ext = {ir, i, il};
      for (int k = 4; k >= 1; k--) begin
        g_exp[4*(4-k)+0] = ext[k] ^ ext[k+1] ^ ext[k-1];  // Q
        g_exp[4*(4-k)+1] = s1 ^ s0;                        // R
        g_exp[4*(4-k)+2] = ext[k-1];                       // S = C ^ 0
        g_exp[4*(4-k)+3] = s1 ^ s0;                        // T = 0 ^ E ^ F
      end
      g_exp[16] = s1;                                      // U of last gate
      checks++;
      if (garbage !== g_exp) begin
        failures++;
        $display("FAIL garbage: i=%b ir=%b il=%b s=%b%b got %b expected %b",
                 i, ir, il, s1, s0, garbage, g_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
