// feynman_gate - 2x2 reversible controlled-NOT gate.
//
// Outputs: P = A, Q = A xor B. With B tied to 0 the gate copies A onto Q,
// which is how the shifters produce a second copy of a signal: reversible
// logic allows no fan-out, so every signal used twice goes through one of
// these gates. With B = 1 it gives A and its complement. Quantum cost 1.
// Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,  // = a
  output logic q   // = a ^ b
);
  assign p = a;
  assign q = a ^ b;
endmodule
