// tb_als_control_unit - exhaustive test of the arithmetic left shift
// control unit: lsb_out = sla ? sign_in : lsb_in, sign_out = sign_in, and
// garbage = {sla, sla ? lsb_in : sign_in}.
module tb_als_control_unit;
  logic sla, sign_in, sign_out, lsb_in, lsb_out;
  logic [1:0] garbage_out;
  int checks = 0, failures = 0;

  als_control_unit dut (.sla, .sign_in, .sign_out, .lsb_in, .lsb_out, .garbage_out);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sla, sign_in, lsb_in} = v[2:0];
      #1;
      checks++;
      if (lsb_out !== (sla ? sign_in : lsb_in) || sign_out !== sign_in) begin
        failures++;
        $display("FAIL sla=%b sign=%b lsb_in=%b -> lsb_out=%b sign_out=%b",
                 sla, sign_in, lsb_in, lsb_out, sign_out);
      end
      checks++;
      if (garbage_out !== {sla, sla ? lsb_in : sign_in}) begin
        failures++;
        $display("FAIL garbage=%b", garbage_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
