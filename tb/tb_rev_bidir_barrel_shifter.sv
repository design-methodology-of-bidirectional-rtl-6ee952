// tb_rev_bidir_barrel_shifter - exhaustive test of the (8,3) bidirectional
// reversible barrel shifter.
//
// 1. The output patterns of the operation table for a shift of 3, written as
//    bit indices (for example rotate right gives a2 a1 a0 a7 a6 a5 a4 a3), on
//    random words.
// 2. Every word, shift amount and each of the six operations against the
//    textbook result (op_ref).
// 3. Every word, shift amount and all 16 control combinations against the
//    unit-level model (unit_ref); the 15-bit input space is covered.
// 4. Reversibility: with the ancilla inputs at 0 the circuit must map the
//    2^15 inputs to 2^15 different {data_out, garbage} patterns, and the
//    garbage width must equal the k*(n+1) + 6 + 2^k - 1 formula.
module tb_rev_bidir_barrel_shifter;
  import rbs_pkg::*;
  import rbs_ref_pkg::*;
  localparam int unsigned N = 8, K = 3;
  localparam int unsigned G = K * (N + 1) + 6 + (1 << K) - 1;

  logic [N-1:0] data_in, data_out;
  logic [K-1:0] shamt;
  ctrl_t        ctrl;
  logic [G-1:0] garbage;
  int checks = 0, failures = 0;
  bit seen [logic [N+G-1:0]];

  rev_bidir_barrel_shifter #(.N(N), .K(K)) dut (.data_in, .shamt, .ctrl, .data_out, .garbage);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operation table for a 3-bit shift, MSB first; -1 stands for a 0 bit.
  int table3 [6][8] = '{
    '{-1, -1, -1, 7, 6, 5, 4, 3},   // shift right logical
    '{ 7,  7,  7, 7, 6, 5, 4, 3},   // shift right arithmetic
    '{ 2,  1,  0, 7, 6, 5, 4, 3},   // rotate right
    '{ 4,  3,  2, 1, 0, -1, -1, -1},// shift left logical
    '{ 7,  3,  2, 1, 0, -1, -1, -1},// shift left arithmetic
    '{ 4,  3,  2, 1, 0, 7, 6, 5}    // rotate left
  };

  initial begin
    // 1. operation table
    for (int o = 0; o < 6; o++) begin
      for (int t = 0; t < 20; t++) begin
        logic [N-1:0] exp;
        data_in = N'($urandom);
        shamt   = 3'd3;
        ctrl    = op_ctrl(op_e'(o));
        #1;
        for (int b = 0; b < 8; b++)
          exp[7-b] = (table3[o][b] < 0) ? 1'b0 : data_in[table3[o][b]];
        checks++;
        if (data_out !== exp) begin
          failures++;
          $display("FAIL table op=%0d x=%b y=%b exp=%b", o, data_in, data_out, exp);
        end
      end
    end
    // 2. six operations, exhaustive
    for (int o = 0; o < 6; o++) begin
      for (int v = 0; v < (1 << (N + K)); v++) begin
        logic [N-1:0] exp;
        {shamt, data_in} = v[N+K-1:0];
        ctrl = op_ctrl(op_e'(o));
        #1;
        exp = N'(op_ref(64'(data_in), shamt, op_e'(o), N));
        checks++;
        if (data_out !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%0d x=%b s=%0d y=%b exp=%b", o, data_in, shamt, data_out, exp);
        end
      end
    end
    // 3./4. all control combinations, exhaustive, plus reversibility
    for (int v = 0; v < (1 << (N + K + 4)); v++) begin
      logic [N-1:0] exp;
      {ctrl, shamt, data_in} = v[N+K+3:0];
      #1;
      exp = N'(unit_ref(64'(data_in), shamt, ctrl, N));
      checks++;
      if (data_out !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL ctrl=%b x=%b s=%0d y=%b exp=%b", ctrl, data_in, shamt, data_out, exp);
      end
      seen[{data_out, garbage}] = 1'b1;
    end
    checks++;
    if (seen.num() != (1 << (N + K + 4))) begin
      failures++;
      $display("FAIL not reversible: %0d distinct outputs", seen.num());
    end
    checks++;
    if (G != garbage_count(N, K) || G != 40) begin
      failures++;
      $display("FAIL garbage width %0d", G);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
