// tb_shifter_unit - exhaustive test of the (8,3) shifter/rotation unit.
//
// For every 8-bit word, shift amount 0..7, rot and fill value (all fill
// copies equal, as the arithmetic right shift unit drives them): the output
// must be the word rotated right (rot = 1) or shifted right with the fill
// bit entering at the top (rot = 0). Also checks that the last garbage bit
// carries rot out of the rotation chain.
module tb_shifter_unit;
  import rbs_ref_pkg::*;
  localparam int unsigned N = 8, K = 3, NF = (1 << K) - 1;
  logic [N-1:0] x_in, y_out, exp;
  logic [K-1:0] s;
  logic         rot, f;
  logic [NF-1:0] fill_in;
  logic [K*(N+1)+(1<<K)-1:0] garbage_out;
  int checks = 0, failures = 0;

  shifter_unit #(.N(N), .K(K)) dut (.x_in, .s, .rot, .fill_in, .y_out, .garbage_out);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (N + K + 2)); v++) begin
      {rot, f, s, x_in} = v[N+K+1:0];
      fill_in = {NF{f}};
      #1;
      if (rot) exp = N'(rotr(64'(x_in), s, N));
      else     exp = N'((64'(x_in) >> s) | (f ? 64'(8'hff & ~(8'hff >> s)) : 64'd0));
      checks++;
      if (y_out !== exp || garbage_out[$bits(garbage_out)-1] !== rot) begin
        failures++;
        $display("FAIL x=%b s=%0d rot=%b fill=%b y=%b exp=%b", x_in, s, rot, f, y_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
