// ars_control_unit - arithmetic right shift control unit.
//
// Produces the bit that fills the vacated MSB positions in a right shift:
// the sign bit when sra = 1, otherwise 0, in 2^K - 1 copies (2^(K-1) for the
// first shift stage, ..., 1 for the last).
//
// A Feynman gate first copies the sign bit msb_in; one copy goes on to the
// shifter as msb_out. One Fredkin gate with A = sra, B = 0 (ancilla) and
// C = sign gives Q = sra ? sign : 0. A chain of 2^K - 2 Feynman gates, each
// copying onto a 0, then makes the 2^K - 1 copies. Together 2^K - 1 Feynman
// gates, 1 Fredkin gate, 2^K ancilla inputs and 2 garbage outputs (the
// Fredkin's P and R). Combinational.
//
// The gate counts follow the published design; the copy chain (rather than a tree) is
// this implementation's choice and only affects depth.
module ars_control_unit #(
  parameter int unsigned K = 3
) (
  input  logic                sra,
  input  logic                msb_in,     // sign bit of the (possibly reversed) data
  output logic                msb_out,    // sign bit passed on to the shifter
  output logic [(1<<K)-2:0]   fill_out,   // fill bit copies, index 0 for stage I first
  output logic [1:0]          garbage_out // {Fredkin P, Fredkin R}
);
  localparam int unsigned NF = (1 << K) - 1;

  logic sign_copy;
  logic fill0;
  logic [NF-1:0] chain;

  feynman_gate u_fe_sign (
    .a(msb_in), .b(1'b0), .p(msb_out), .q(sign_copy)
  );

  fredkin_gate u_fr_sra (
    .a(sra), .b(1'b0), .c(sign_copy),
    .p(garbage_out[1]), .q(fill0), .r(garbage_out[0])
  );

  assign chain[0] = fill0;
  for (genvar i = 1; i < NF; i++) begin : g_fe
    feynman_gate u_fe (
      .a(chain[i-1]), .b(1'b0), .p(fill_out[i-1]), .q(chain[i])
    );
  end
  assign fill_out[NF-1] = chain[NF-1];
endmodule
