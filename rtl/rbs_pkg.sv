// rbs_pkg - shared types and cost formulas for the reversible barrel shifters.
//
// ctrl_t bundles the four mode controls of the bidirectional shifter (left,
// rot, sra, sla). op_e names the six operations, and op_ctrl() maps each one
// to its control values as in the published operation table (for example
// arithmetic right shift = left 0, rot 0, sra 1, sla 0).
//
// The functions give the cost of an (n,k) shifter built from Fredkin (FR)
// and Feynman (FE) gates, n data bits and k shift-select bits:
//   FR      = (2^k - 1) + n*(k+1) + 2
//   FE      = 2^k + n*k
//   ancilla = FE + 1               (every FE copies onto a 0, plus one FR input)
//   QC      = 5*FR + FE            (Fredkin costs 5, Feynman costs 1)
//   garbage = k*(n+1) + 6 + (2^k - 1)
// These follow the published cost analysis; the gate counts of the RTL
// match them (41 FR, 32 FE, 33 ancilla, 40 garbage, QC 237 for (8,3)).
package rbs_pkg;

  typedef struct packed {
    logic left;  // 1: shift/rotate towards the MSB
    logic rot;   // 1: rotate instead of shift
    logic sra;   // 1: arithmetic right shift (fill with the sign bit)
    logic sla;   // 1: arithmetic left shift (keep the sign bit in the MSB)
  } ctrl_t;

  typedef enum logic [2:0] {
    OP_SRL = 3'd0,  // logical right shift
    OP_SRA = 3'd1,  // arithmetic right shift
    OP_ROR = 3'd2,  // rotate right
    OP_SLL = 3'd3,  // logical left shift
    OP_SLA = 3'd4,  // arithmetic left shift
    OP_ROL = 3'd5   // rotate left
  } op_e;

  function automatic ctrl_t op_ctrl(op_e op);
    ctrl_t c;
    c = '0;
    case (op)
      OP_SRL: c = '0;
      OP_SRA: c.sra = 1'b1;
      OP_ROR: c.rot = 1'b1;
      OP_SLL: c.left = 1'b1;
      OP_SLA: begin c.left = 1'b1; c.sla = 1'b1; end
      OP_ROL: begin c.left = 1'b1; c.rot = 1'b1; end
      default: c = '0;
    endcase
    return c;
  endfunction

  // Number of fill copies needed by all stages together: 2^(k-1)+...+2+1.
  function automatic int unsigned fill_count(int unsigned k);
    return (1 << k) - 1;
  endfunction

  function automatic int unsigned fredkin_count(int unsigned n, int unsigned k);
    return fill_count(k) + n * (k + 1) + 2;
  endfunction

  function automatic int unsigned feynman_count(int unsigned n, int unsigned k);
    return (1 << k) + n * k;
  endfunction

  function automatic int unsigned ancilla_count(int unsigned n, int unsigned k);
    return feynman_count(n, k) + 1;
  endfunction

  function automatic int unsigned quantum_cost(int unsigned n, int unsigned k);
    return 5 * fredkin_count(n, k) + feynman_count(n, k);
  endfunction

  function automatic int unsigned garbage_count(int unsigned n, int unsigned k);
    return k * (n + 1) + 6 + fill_count(k);
  endfunction

endpackage
