// als_control_unit - arithmetic left shift control unit.
//
// A left shift runs as a right shift of the reversed word, so the bit that
// ends up in the MSB of the result is the LSB of the shifter output. For an
// arithmetic left shift that bit must be the original sign bit, which in the
// reversed word sits at bit 0 before shifting.
//
// A Feynman gate copies sign_in (bit 0 of the reversed word) before the
// shifter: one copy goes on as sign_out, the other is held here. After the
// shifter, one Fredkin gate with A = sla, B = lsb_in, C = sign copy gives
// lsb_out = sla ? sign : lsb_in. 1 Feynman gate, 1 Fredkin gate, 1 ancilla,
// 2 garbage outputs (the Fredkin's P and R). Combinational.
//
// Structure and gate counts follow the published design.
module als_control_unit (
  input  logic       sla,
  input  logic       sign_in,     // bit 0 of the word entering the shifter
  output logic       sign_out,    // same bit, passed on to the shifter
  input  logic       lsb_in,      // bit 0 of the shifter output
  output logic       lsb_out,     // bit 0 handed to data reversal unit II
  output logic [1:0] garbage_out  // {Fredkin P, Fredkin R}
);
  logic sign_copy;

  feynman_gate u_fe_sign (
    .a(sign_in), .b(1'b0), .p(sign_out), .q(sign_copy)
  );

  fredkin_gate u_fr_sla (
    .a(sla), .b(lsb_in), .c(sign_copy),
    .p(garbage_out[1]), .q(lsb_out), .r(garbage_out[0])
  );
endmodule
