// tb_rbs_table_sweep - the bidirectional shifter at every (n,k) size of the
// cost tables: n = 4..64, k = 2..log2(n).
//
// For each size one shifter is built and driven with random words, shift
// amounts 0..2^k-1 and all six operations, checked against the textbook
// result. The garbage port width of each instance must equal the garbage
// formula, and the cost formulas of rbs_pkg are compared with the printed
// table values of ancilla inputs, quantum cost and garbage outputs.
// The quantum-cost table prints 137 for (4,2), which the formula
// 5*FR + FE gives as 97; the test expects the formula value there (all other
// entries agree with the formula).
module tb_rbs_table_sweep;
  import rbs_pkg::*;
  import rbs_ref_pkg::*;

  localparam int NCFG = 15;
  localparam int CFG_N [NCFG] = '{4, 8, 8, 16, 16, 16, 32, 32, 32, 32, 64, 64, 64, 64, 64};
  localparam int CFG_K [NCFG] = '{2, 2, 3, 2, 3, 4, 2, 3, 4, 5, 2, 3, 4, 5, 6};
  // printed table values, same order
  int anc_tab [NCFG] = '{13, 21, 33, 37, 57, 81, 69, 105, 145, 193, 133, 201, 273, 353, 449};
  int qc_tab  [NCFG] = '{97, 165, 237, 301, 421, 565, 573, 789, 1029, 1317, 1117, 1525, 1957, 2437, 3013};
  int go_tab  [NCFG] = '{19, 27, 40, 43, 64, 89, 75, 112, 153, 202, 139, 208, 281, 362, 459};
  localparam int TRIALS = 3000;

  int checks = 0, failures = 0, done = 0;

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned N = CFG_N[c];
    localparam int unsigned K = CFG_K[c];
    localparam int unsigned G = K * (N + 1) + 6 + (1 << K) - 1;
    logic [N-1:0] data_in, data_out;
    logic [K-1:0] shamt;
    ctrl_t        ctrl;
    logic [G-1:0] garbage;

    rev_bidir_barrel_shifter #(.N(N), .K(K)) dut (.data_in, .shamt, .ctrl, .data_out, .garbage);

    initial begin
      #(c * 100000 + 1);
      for (int t = 0; t < TRIALS; t++) begin
        logic [N-1:0] exp;
        op_e op;
        op      = op_e'(t % 6);
        data_in = N'({$urandom, $urandom});
        shamt   = K'($urandom);
        ctrl    = op_ctrl(op);
        #1;
        exp = N'(op_ref(64'(data_in), shamt, op, N));
        checks++;
        if (data_out !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL (%0d,%0d) op=%s x=%h s=%0d y=%h exp=%h", N, K, op.name(),
                     data_in, shamt, data_out, exp);
        end
      end
      checks++;
      if (G != garbage_count(N, K) || int'(garbage_count(N, K)) != go_tab[c] ||
          int'(ancilla_count(N, K)) != anc_tab[c] || int'(quantum_cost(N, K)) != qc_tab[c]) begin
        failures++;
        $display("FAIL (%0d,%0d) costs: garbage %0d/%0d ancilla %0d/%0d qc %0d/%0d", N, K,
                 garbage_count(N, K), go_tab[c], ancilla_count(N, K), anc_tab[c],
                 quantum_cost(N, K), qc_tab[c]);
      end
      $display("(%0d,%0d): FR %0d FE %0d ancilla %0d QC %0d garbage %0d", N, K,
               fredkin_count(N, K), feynman_count(N, K), ancilla_count(N, K),
               quantum_cost(N, K), garbage_count(N, K));
      done++;
    end
  end

  initial begin
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
