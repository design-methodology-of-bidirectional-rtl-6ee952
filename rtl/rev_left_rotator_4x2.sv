// rev_left_rotator_4x2 - (4,2) reversible logarithmic left rotator.
//
// Rotates a 4-bit word left (towards the MSB) by 0..3 positions in one
// combinational pass, using 4 Feynman and 6 Fredkin gates, 4 ancilla inputs
// and 6 garbage outputs (quantum cost 6*5 + 4 = 34).
//
// Stage 1 (control s[0], rotate by 1): Feynman gate j copies bit j onto a 0;
// Fredkin gate j takes copy A of bit j on B and copy B of bit j-1 (mod 4) on
// C, so its Q output is s0 ? x[j-1] : x[j]. Its R output is garbage, as is
// the s0 control leaving the last gate. Stage 2 (control s[1], rotate by 2)
// needs no copies: a rotation by 2 of 4 bits swaps bits 0<->2 and 1<->3,
// which is exactly what a Fredkin gate does to its B and C inputs, so two
// gates use both their Q and R outputs. The s1 control leaving the second
// gate is the last garbage output.
//
// Gate types, counts, the garbage count and the use of both outputs in the
// second stage follow the published design. Bit order (bit 3 = MSB, left = towards
// bit 3) is this implementation's reading.
//
// garbage = {s1 out, s0 out, R of stage-1 gates 3..0}
module rev_left_rotator_4x2 (
  input  logic [3:0] data_in,
  input  logic [1:0] s,
  output logic [3:0] data_out,
  output logic [5:0] garbage
);
  logic [3:0] xa, xb;     // Feynman copies
  logic [4:0] c0;         // s0 chain
  logic [2:0] c1;         // s1 chain
  logic [3:0] y;          // stage 1 output

  for (genvar j = 0; j < 4; j++) begin : g_fe
    feynman_gate u_fe (.a(data_in[j]), .b(1'b0), .p(xa[j]), .q(xb[j]));
  end

  assign c0[0] = s[0];
  for (genvar j = 0; j < 4; j++) begin : g_st1
    fredkin_gate u_fr (
      .a(c0[j]), .b(xa[j]), .c(xb[(j+3)%4]),
      .p(c0[j+1]), .q(y[j]), .r(garbage[j])
    );
  end
  assign garbage[4] = c0[4];

  assign c1[0] = s[1];
  for (genvar j = 0; j < 2; j++) begin : g_st2
    fredkin_gate u_fr (
      .a(c1[j]), .b(y[j]), .c(y[j+2]),
      .p(c1[j+1]), .q(data_out[j]), .r(data_out[j+2])
    );
  end
  assign garbage[5] = c1[2];
endmodule
