// rbs_ref_pkg - reference models for the shifter testbenches.
//
// Words are held in 64-bit variables; only the low n bits are meaningful.
// op_ref() gives the textbook result of each of the six operations.
// unit_ref() describes the bidirectional shifter for any of the 16 control
// combinations as a composition of its units (reverse if left, right shift
// with fill = sra ? sign : 0 or rotate if rot, put the saved sign in bit 0
// if sla, reverse back if left). Both are written at word level and share
// nothing with the gate-level RTL.
package rbs_ref_pkg;
  import rbs_pkg::*;

  typedef logic [63:0] word_t;

  function automatic word_t mask(int unsigned n);
    return (n >= 64) ? '1 : ((word_t'(1) << n) - 1);
  endfunction

  function automatic word_t reverse(word_t x, int unsigned n);
    word_t r = '0;
    for (int unsigned i = 0; i < n; i++) r[i] = x[n-1-i];
    return r;
  endfunction

  function automatic word_t rotr(word_t x, int unsigned s, int unsigned n);
    x &= mask(n);
    if (s == 0) return x;
    return ((x >> s) | (x << (n - s))) & mask(n);
  endfunction

  function automatic word_t op_ref(word_t x, int unsigned s, op_e op, int unsigned n);
    word_t m = mask(n);
    logic  sign;
    x &= m;
    sign = x[n-1];
    case (op)
      OP_SRL: return x >> s;
      OP_SRA: return ((x >> s) | (sign ? (m & ~(m >> s)) : '0)) & m;
      OP_ROR: return rotr(x, s, n);
      OP_SLL: return (x << s) & m;
      OP_SLA: begin
        word_t y = (x << s) & m;
        y[n-1] = sign;
        return y;
      end
      OP_ROL: return rotr(x, (n - s) % n, n);
      default: return '0;
    endcase
  endfunction

  function automatic word_t unit_ref(word_t x, int unsigned s, ctrl_t c, int unsigned n);
    word_t m = mask(n);
    word_t r, t;
    logic  fill;
    x &= m;
    r = c.left ? reverse(x, n) : x;
    fill = c.sra & r[n-1];
    if (c.rot) t = rotr(r, s, n);
    else       t = ((r >> s) | (fill ? (m & ~(m >> s)) : '0)) & m;
    if (c.sla) t[0] = r[0];
    return c.left ? reverse(t, n) : t;
  endfunction
endpackage
