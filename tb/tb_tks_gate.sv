// tb_tks_gate: exhaustive self-checking test of the 3x3 TKS gate.
//
// All 8 input combinations are applied. P must equal A when C=0 and B when
// C=1, R the opposite choice, Q the parity of the inputs. The test also
// checks that the gate is a bijection: the eight output words are distinct.
module tb_tks_gate;

  logic a, b, c;
  logic p, q, r;
  int   checks   = 0;
  int   failures = 0;

  tks_gate dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: inputs abc=%b%b%b got %b expected %b", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    static logic [7:0] seen = '0;
    for (int n = 0; n < 8; n++) begin
      {a, b, c} = 3'(n);
      #1;
      check("P", p, c ? b : a);
      check("Q", q, (a + b + c) % 2 == 1);
      check("R", r, c ? a : b);
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hFF) begin
      failures++;
      $display("FAIL gate is not one-to-one: output words seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
