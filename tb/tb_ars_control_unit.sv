// tb_ars_control_unit - exhaustive test of the arithmetic right shift
// control unit with K = 3 (7 fill copies).
//
// For sra and msb_in in all four combinations: every fill copy must equal
// sra & msb_in, msb_out must equal msb_in, and the garbage outputs must be
// the Fredkin gate's P (= sra) and R (= sra ? 0 : msb_in).
module tb_ars_control_unit;
  localparam int unsigned K  = 3;
  localparam int unsigned NF = (1 << K) - 1;
  logic          sra, msb_in, msb_out;
  logic [NF-1:0] fill_out;
  logic [1:0]    garbage_out;
  int checks = 0, failures = 0;

  ars_control_unit #(.K(K)) dut (.sra, .msb_in, .msb_out, .fill_out, .garbage_out);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {sra, msb_in} = v[1:0];
      #1;
      checks++;
      if (fill_out !== {NF{sra & msb_in}}) begin
        failures++;
        $display("FAIL sra=%b msb=%b fill=%b", sra, msb_in, fill_out);
      end
      checks++;
      if (msb_out !== msb_in) begin
        failures++;
        $display("FAIL msb_out=%b msb_in=%b", msb_out, msb_in);
      end
      checks++;
      if (garbage_out !== {sra, sra ? 1'b0 : msb_in}) begin
        failures++;
        $display("FAIL garbage=%b", garbage_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
