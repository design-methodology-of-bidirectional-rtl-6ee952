// tb_rotation_unit - exhaustive test of a 4-gate rotation unit slice.
//
// For every rot, fill and wrap value: sel_out must be wrap_in when rot = 1
// and fill_in when rot = 0, rot_out must repeat rot_in, and garbage_out must
// hold the unselected bits.
module tb_rotation_unit;
  localparam int unsigned W = 4;
  logic         rot_in, rot_out;
  logic [W-1:0] fill_in, wrap_in, sel_out, garbage_out;
  int checks = 0, failures = 0;

  rotation_unit #(.WIDTH(W)) dut (.rot_in, .fill_in, .wrap_in, .sel_out, .rot_out, .garbage_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {rot_in, fill_in, wrap_in} = v[2*W:0];
      #1;
      checks++;
      if (sel_out !== (rot_in ? wrap_in : fill_in) || rot_out !== rot_in ||
          garbage_out !== (rot_in ? fill_in : wrap_in)) begin
        failures++;
        $display("FAIL rot=%b fill=%b wrap=%b sel=%b rot_out=%b g=%b",
                 rot_in, fill_in, wrap_in, sel_out, rot_out, garbage_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
