// tb_rev_shifter4: end-to-end test of the shifter top at its default
// configuration (the four-VSMT-gate realisation, no parameter overrides).
//
// Phase 1 replays the published simulation: data 1111, IR = IL = 0, and the
// select stepping 00, 01, 10, 11; the outputs must read 1111, 0111, 1110,
// 0000 (O4 first). Phase 2 applies all 256 input combinations and compares
// with the reference function in shifter_pkg. Each operation (pass, shift
// right, shift left, clear) and each serial fill (a 1 from IR entering O4,
// a 1 from IL entering O1) is counted, and one that never occurred is a
// failure. The garbage bus must be 17 bits wide.
module tb_rev_shifter4;
  import shifter_pkg::*;

  logic [4:1] i, o;
  logic       ir, il, s1, s0;
  logic [16:0] garbage;
  int checks   = 0;
  int failures = 0;
  int n_op [4] = '{default: 0};
  int n_ir_fill = 0;
  int n_il_fill = 0;

  rev_shifter4 dut (.*);

  task automatic check_out(input logic [4:1] exp);
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL i=%b ir=%b il=%b s=%b%b: got o=%b expected %b",
               i, ir, il, s1, s0, o, exp);
    end
  endtask

  initial begin
    // Phase 1: the four steps of the published waveform
    static logic [4:1] wave [4] = '{4'b1111, 4'b0111, 4'b1110, 4'b0000};
    checks++;
    if ($bits(dut.garbage) != VSMT_GARBAGE) begin
      failures++;
      $display("FAIL garbage width %0d", $bits(dut.garbage));
    end
    i = 4'b1111; ir = 1'b0; il = 1'b0;
    for (int step = 0; step < 4; step++) begin
      {s1, s0} = 2'(step);
      #10;
      check_out(wave[step]);
    end

    // Phase 2: every input combination against the reference function
    for (int n = 0; n < 256; n++) begin
      shift_op_e op;
      {i, ir, il, s1, s0} = 8'(n);
      op = shift_op_e'({s1, s0});
      #1;
      check_out(shift_ref(i, ir, il, op));
      n_op[{s1, s0}]++;
      if (op == OP_SHR && ir && o[4]) n_ir_fill++;
      if (op == OP_SHL && il && o[1]) n_il_fill++;
    end

    $display("operations: pass=%0d shr=%0d shl=%0d clear=%0d, IR fills=%0d, IL fills=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_ir_fill, n_il_fill);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_op[k] == 0) begin
        failures++;
        $display("FAIL operation %0d never exercised", k);
      end
    end
    checks++;
    if (n_ir_fill == 0 || n_il_fill == 0) begin
      failures++;
      $display("FAIL a serial fill never exercised");
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
