// tb_fredkin_gate - exhaustive test of the Fredkin gate.
//
// Applies all 8 input combinations, compares P, Q, R with the controlled-swap
// truth table (A = 0: pass B, C; A = 1: swap them), and checks that the eight
// output triples are all different, i.e. the gate is reversible.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  fredkin_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      logic [2:0] exp;
      {a, b, c} = v[2:0];
      #1;
      exp = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL abc=%b pqr=%b exp=%b", {a, b, c}, {p, q, r}, exp);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
