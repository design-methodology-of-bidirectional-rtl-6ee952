// data_reversal_unit - reverses the bit order of a word when its control is 1.
//
// Used twice in the bidirectional shifter: unit I on the input word and
// unit II on the shifted word, both controlled by `left`. A left shift is
// done as reverse, shift right, reverse.
//
// N/2 Fredkin gates form a chain on the control: gate j takes bit N-1-j on
// its B input and bit j on its C input, so its Q output is bit N-1-j of the
// result and its R output is bit j. With ctl = 0 the word passes unchanged;
// with ctl = 1 each pair is swapped. The control leaves the last gate on
// ctl_out: unit I hands it on to unit II, and in unit II it is a garbage
// output. No ancilla inputs. Combinational.
//
// The pairing (i7,i0), (i6,i1), ... and the gate count N/2 follow the published design;
// N must be even.
module data_reversal_unit #(
  parameter int unsigned N = 8
) (
  input  logic         ctl_in,   // left
  input  logic [N-1:0] d_in,
  output logic [N-1:0] d_out,
  output logic         ctl_out   // left, passed through the chain
);
  localparam int unsigned HALF = N / 2;

  if (N % 2 != 0) begin : g_bad_n
    $error("data_reversal_unit: N must be even");
  end

  logic [HALF:0] ctl;
  assign ctl[0]  = ctl_in;
  assign ctl_out = ctl[HALF];

  for (genvar j = 0; j < HALF; j++) begin : g_fr
    fredkin_gate u_fr (
      .a(ctl[j]),
      .b(d_in[N-1-j]),
      .c(d_in[j]),
      .p(ctl[j+1]),
      .q(d_out[N-1-j]),
      .r(d_out[j])
    );
  end
endmodule
