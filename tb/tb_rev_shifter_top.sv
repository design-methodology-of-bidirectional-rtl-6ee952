// tb_rev_shifter_top - end-to-end test of the top at its default size:
// the (8,3) bidirectional shifter and the (4,2) left rotator.
//
// Every word and shift amount is run through each of the six operations of
// the bidirectional shifter and checked against the textbook result; every
// word and amount is run through the rotator. Since the design is
// combinational, each result is sampled 1 time unit after the inputs change
// (a single pass, no clock). The test counts how often each mechanism of the
// design actually acted and fails if one never did:
//   reversal      the word was reversed (left = 1) and that changed it
//   stage I/II/III  the stage's select bit was set
//   sign fill     an arithmetic right shift filled 1s from the sign bit
//   wrap          a rotation brought bits around from the other end
//   sign keep     an arithmetic left shift kept a sign the shift would lose
//   rot4 stage 1/2  the rotator's select bits
module tb_rev_shifter_top;
  import rbs_pkg::*;
  import rbs_ref_pkg::*;
  localparam int unsigned N = 8, K = 3;
  localparam int unsigned G = K * (N + 1) + 6 + (1 << K) - 1;

  logic [N-1:0] bidir_data_in, bidir_data_out;
  logic [K-1:0] bidir_shamt;
  ctrl_t        bidir_ctrl;
  logic [G-1:0] bidir_garbage;
  logic [3:0]   rot4_data_in, rot4_data_out;
  logic [1:0]   rot4_s;
  logic [5:0]   rot4_garbage;
  int checks = 0, failures = 0;

  typedef enum int {M_REVERSE, M_STAGE1, M_STAGE2, M_STAGE3, M_SIGN_FILL,
                    M_WRAP, M_SIGN_KEEP, M_ROT4_S1, M_ROT4_S2, M_COUNT} mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"reversal", "stage I", "stage II", "stage III",
                                 "sign fill", "wrap", "sign keep", "rot4 stage 1",
                                 "rot4 stage 2"};

  rev_shifter_top dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mech[i]) mech[i] = 0;
    rot4_data_in = '0;
    rot4_s = '0;
    for (int o = 0; o < 6; o++) begin
      for (int v = 0; v < (1 << (N + K)); v++) begin
        logic [N-1:0] exp, lsl;
        op_e op;
        op = op_e'(o);
        {bidir_shamt, bidir_data_in} = v[N+K-1:0];
        bidir_ctrl = op_ctrl(op);
        #1;
        exp = N'(op_ref(64'(bidir_data_in), bidir_shamt, op, N));
        checks++;
        if (bidir_data_out !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL op=%s x=%b s=%0d y=%b exp=%b", op.name(), bidir_data_in,
                     bidir_shamt, bidir_data_out, exp);
        end
        if (bidir_ctrl.left && N'(reverse(64'(bidir_data_in), N)) != bidir_data_in)
          mech[M_REVERSE]++;
        if (bidir_shamt[2]) mech[M_STAGE1]++;
        if (bidir_shamt[1]) mech[M_STAGE2]++;
        if (bidir_shamt[0]) mech[M_STAGE3]++;
        if (op == OP_SRA && bidir_data_in[N-1] && bidir_shamt != 0) mech[M_SIGN_FILL]++;
        if ((op == OP_ROR || op == OP_ROL) && bidir_shamt != 0 &&
            exp != N'(op_ref(64'(bidir_data_in), bidir_shamt,
                             op == OP_ROR ? OP_SRL : OP_SLL, N)))
          mech[M_WRAP]++;
        lsl = bidir_data_in << bidir_shamt;
        if (op == OP_SLA && lsl[N-1] != bidir_data_in[N-1]) mech[M_SIGN_KEEP]++;
      end
    end
    for (int v = 0; v < 64; v++) begin
      logic [3:0] exp;
      {rot4_s, rot4_data_in} = v[5:0];
      #1;
      exp = 4'((12'({rot4_data_in, rot4_data_in}) << rot4_s) >> 4);
      checks++;
      if (rot4_data_out !== exp) begin
        failures++;
        $display("FAIL rot4 x=%b s=%0d y=%b exp=%b", rot4_data_in, rot4_s, rot4_data_out, exp);
      end
      if (rot4_s[0]) mech[M_ROT4_S1]++;
      if (rot4_s[1]) mech[M_ROT4_S2]++;
    end
    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %-12s happened %0d times", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
