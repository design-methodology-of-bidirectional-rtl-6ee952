// tb_rev_left_rotator_4x2 - exhaustive test of the (4,2) left rotator.
//
// For every 4-bit word and rotate amount 0..3 the output must be the word
// rotated towards the MSB. Also checks the reversibility of the whole
// netlist: over all 64 input combinations the 10 output bits (data and
// garbage) must be all different, and the two control garbage bits must
// repeat s.
module tb_rev_left_rotator_4x2;
  logic [3:0] data_in, data_out, exp;
  logic [1:0] s;
  logic [5:0] garbage;
  logic [1023:0] seen;
  int checks = 0, failures = 0;

  rev_left_rotator_4x2 dut (.data_in, .s, .data_out, .garbage);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 64; v++) begin
      {s, data_in} = v[5:0];
      #1;
      exp = 4'((12'({data_in, data_in}) << s) >> 4);
      checks++;
      if (data_out !== exp || garbage[5:4] !== {s[1], s[0]}) begin
        failures++;
        $display("FAIL x=%b s=%0d y=%b exp=%b g=%b", data_in, s, data_out, exp, garbage);
      end
      checks++;
      if (seen[{data_out, garbage}]) begin
        failures++;
        $display("FAIL output pattern repeated for x=%b s=%0d", data_in, s);
      end
      seen[{data_out, garbage}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
