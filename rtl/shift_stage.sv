// shift_stage - one stage of the logarithmic shifter: shifts right by SHIFT
// positions when s_in = 1, else passes the word.
//
// N Feynman gates each copy one input bit onto a 0 (ancilla), since every
// bit is needed twice. Copy A of bit j goes to the B input of Fredkin gate j;
// copy B of bit j goes to the C input of Fredkin gate j-SHIFT, or, for the
// low SHIFT bits, out on wrap_out to the rotation unit. Fredkin gate j
// (A = stage control) thus outputs y[j] = s ? x[j+SHIFT] : x[j] on Q, where
// for the top SHIFT positions x[j+SHIFT] is replaced by top_in[j-(N-SHIFT)],
// the rotation unit's choice of fill or wrapped bit. The control runs
// through the N gates; each R output is garbage, and so is the control
// leaving the last gate: N+1 garbage outputs. Combinational.
//
// Structure (n Feynman and n Fredkin gates per stage) follows the published design.
module shift_stage #(
  parameter int unsigned N     = 8,
  parameter int unsigned SHIFT = 4
) (
  input  logic             s_in,        // this stage's select bit
  input  logic [N-1:0]     x_in,
  input  logic [SHIFT-1:0] top_in,      // bits entering at positions N-SHIFT..N-1
  output logic [SHIFT-1:0] wrap_out,    // copies of x_in[SHIFT-1:0]
  output logic [N-1:0]     y_out,
  output logic [N:0]       garbage_out  // {last control, R outputs of gates N-1..0}
);
  logic [N-1:0] xa, xb;
  logic [N:0]   ctl;

  if (SHIFT == 0 || SHIFT >= N) begin : g_bad_shift
    $error("shift_stage: SHIFT must be between 1 and N-1");
  end

  for (genvar j = 0; j < N; j++) begin : g_fe
    feynman_gate u_fe (.a(x_in[j]), .b(1'b0), .p(xa[j]), .q(xb[j]));
  end

  assign wrap_out = xb[SHIFT-1:0];

  assign ctl[0] = s_in;
  for (genvar j = 0; j < N; j++) begin : g_fr
    logic hi;  // the bit that arrives at position j when shifting
    if (j + SHIFT < N) begin : g_in
      assign hi = xb[j+SHIFT];
    end else begin : g_top
      assign hi = top_in[j+SHIFT-N];
    end
    fredkin_gate u_fr (
      .a(ctl[j]), .b(xa[j]), .c(hi),
      .p(ctl[j+1]), .q(y_out[j]), .r(garbage_out[j])
    );
  end
  assign garbage_out[N] = ctl[N];
endmodule
