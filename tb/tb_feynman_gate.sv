// tb_feynman_gate - exhaustive test of the Feynman (CNOT) gate.
//
// Applies all 4 input combinations, checks P = A and Q = A xor B, the
// copying use (B = 0 gives Q = A), the complementing use (B = 1 gives
// Q = not A) and that the map is a permutation.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  logic [3:0] seen;

  feynman_gate dut (.a, .b, .p, .q);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if (p !== a || q !== (b ? ~a : a)) begin
        failures++;
        $display("FAIL ab=%b%b pq=%b%b", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hf) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
