// tb_shifter_tks: exhaustive self-checking test of the twelve-TKS-gate shifter.
//
// All 256 combinations of data, serial inputs and select are applied and the
// result compared with a bit-by-bit model of the function table. The garbage
// bus must be 24 bits wide, and since each TKS gate is a bijection, the
// garbage Q/R pairs together with the outputs must let every input be
// recovered: the test checks that no two input words give the same
// (output, garbage) pair.
module tb_shifter_tks;
  import shifter_pkg::*;

  logic [4:1] i, o;
  logic       ir, il, s1, s0;
  logic [TKS_GARBAGE-1:0] garbage;
  int checks   = 0;
  int failures = 0;

  shifter_tks dut (.*);

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
    logic [TKS_GARBAGE+3:0] seen [256];
    checks++;
    if ($bits(garbage) != 24) begin
      failures++;
      $display("FAIL garbage width %0d, expected 24", $bits(garbage));
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
      seen[n] = {o, garbage};
    end
    for (int n = 0; n < 256; n++) begin
      for (int m = n + 1; m < 256; m++) begin
        if (seen[n] == seen[m]) begin
          checks++;
          failures++;
          $display("FAIL inputs %h and %h give the same outputs", n, m);
        end
      end
    end
    checks++;
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
