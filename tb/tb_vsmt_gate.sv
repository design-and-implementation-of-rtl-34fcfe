// tb_vsmt_gate: exhaustive self-checking test of the 6x6 VSMT gate.
//
// All 64 input combinations are applied. The expected multiplexer output is
// taken by indexing the data inputs with the select pair {E,F}; the five
// companion outputs are checked against their XOR definitions. A time-based
// watchdog ends the run with a failure if the stimulus stalls.
module tb_vsmt_gate;

  logic a, b, c, d, e, f;
  logic p, q, r, s, t, u;
  int   checks   = 0;
  int   failures = 0;

  vsmt_gate dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: inputs abcdef=%b%b%b%b%b%b got %b expected %b",
               what, a, b, c, d, e, f, got, exp);
    end
  endtask

  initial begin
    logic [3:0] data;
    for (int n = 0; n < 64; n++) begin
      {a, b, c, d, e, f} = 6'(n);
      #1;
      data = {d, c, b, a};  // data[{E,F}] is the selected input
      check("P", p, data[{e, f}]);
      check("Q", q, ^{a, b, c});
      check("R", r, e != f);
      check("S", s, c != d);
      check("T", t, ^{d, e, f});
      check("U", u, e);
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
