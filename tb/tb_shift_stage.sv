// tb_shift_stage - exhaustive test of 8-bit shift stages with shift
// distances 4, 2 and 1 (the three stages of the (8,3) shifter).
//
// For each stage, every input word, top_in value and select: with s = 0 the
// word must pass; with s = 1 it must move right by SHIFT with top_in filling
// the top. wrap_out must hold the low SHIFT bits of the input, and the last
// garbage bit the stage control.
module tb_shift_stage;
  localparam int unsigned N = 8;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         s;
  logic [N-1:0] x;
  logic [3:0]   top;
  logic [N-1:0] y4, y2, y1;
  logic [3:0]   w4;
  logic [1:0]   w2;
  logic [0:0]   w1;
  logic [N:0]   g4, g2, g1;

  shift_stage #(.N(N), .SHIFT(4)) dut4 (.s_in(s), .x_in(x), .top_in(top),      .wrap_out(w4), .y_out(y4), .garbage_out(g4));
  shift_stage #(.N(N), .SHIFT(2)) dut2 (.s_in(s), .x_in(x), .top_in(top[1:0]), .wrap_out(w2), .y_out(y2), .garbage_out(g2));
  shift_stage #(.N(N), .SHIFT(1)) dut1 (.s_in(s), .x_in(x), .top_in(top[0:0]), .wrap_out(w1), .y_out(y1), .garbage_out(g1));

  task automatic check(string name, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s s=%b x=%b top=%b got=%b exp=%b", name, s, x, top, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << (N + 5)); v++) begin
      {s, top, x} = v[N+4:0];
      #1;
      check("sh4", y4, s ? {top,      x[N-1:4]} : x);
      check("sh2", y2, s ? {top[1:0], x[N-1:2]} : x);
      check("sh1", y1, s ? {top[0],   x[N-1:1]} : x);
      check("wrap", {w4, w2, w1, 1'b0}, {x[3:0], x[1:0], x[0], 1'b0});
      check("gctl", {5'b0, g4[N], g2[N], g1[N]}, {5'b0, s, s, s});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
