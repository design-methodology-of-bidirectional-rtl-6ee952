// tb_data_reversal_unit - exhaustive test of the 8-bit data reversal unit.
//
// For every 8-bit word and both control values: ctl = 0 must pass the word,
// ctl = 1 must give it in reverse bit order, and the control must come out
// unchanged on ctl_out.
module tb_data_reversal_unit;
  localparam int unsigned N = 8;
  logic         ctl_in, ctl_out;
  logic [N-1:0] d_in, d_out, exp;
  int checks = 0, failures = 0;

  data_reversal_unit #(.N(N)) dut (.ctl_in, .d_in, .d_out, .ctl_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < (1 << N); v++) begin
        ctl_in = c[0];
        d_in   = v[N-1:0];
        #1;
        for (int i = 0; i < N; i++) exp[i] = c[0] ? d_in[N-1-i] : d_in[i];
        checks++;
        if (d_out !== exp || ctl_out !== ctl_in) begin
          failures++;
          $display("FAIL ctl=%b d_in=%b d_out=%b exp=%b ctl_out=%b",
                   ctl_in, d_in, d_out, exp, ctl_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
