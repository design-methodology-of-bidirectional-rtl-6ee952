// fredkin_gate - 3x3 reversible controlled-swap gate.
//
// Outputs: P = A, Q = A'B + AC, R = AB + A'C. With A = 0 the inputs B and C
// pass straight through to Q and R; with A = 1 they are swapped. Each of Q
// and R is therefore a 2:1 multiplexer selected by A, which is how the
// shifters use this gate; P carries the control on to the next gate of a
// chain. The mapping (A,B,C) -> (P,Q,R) is a bijection. Quantum cost 5.
// Purely combinational.
module fredkin_gate (
  input  logic a,  // control
  input  logic b,
  input  logic c,
  output logic p,  // = a
  output logic q,  // a ? c : b
  output logic r   // a ? b : c
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
