// rotation_unit - selects, for the bit positions a shift stage vacates,
// between the fill bit and the bit that wraps around.
//
// One slice of WIDTH Fredkin gates serves one shift stage (WIDTH = the
// stage's shift distance, so 4, 2 and 1 gates for an 8-bit shifter: 7 in
// all). Gate j has A = rot, B = fill_in[j] and C = wrap_in[j], and its Q
// output sel_out[j] = rot ? wrap_in[j] : fill_in[j] feeds the shift stage;
// its R output is garbage. The rot control runs through the P outputs from
// gate to gate and from slice to slice (rot_in -> rot_out); after the last
// slice it is one more garbage output. Combinational.
//
// The use of Fredkin gates, the rot control and the total of 2^k - 1 gates
// follow the published design. Splitting the chain into one slice per stage is this
// implementation's choice: it keeps each stage's wrap-around path feed-forward.
module rotation_unit #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             rot_in,
  input  logic [WIDTH-1:0] fill_in,    // from the arithmetic right shift unit
  input  logic [WIDTH-1:0] wrap_in,    // low bits of the stage input
  output logic [WIDTH-1:0] sel_out,    // to the top WIDTH positions of the stage
  output logic             rot_out,
  output logic [WIDTH-1:0] garbage_out // Fredkin R outputs
);
  logic [WIDTH:0] ctl;
  assign ctl[0]  = rot_in;
  assign rot_out = ctl[WIDTH];

  for (genvar j = 0; j < WIDTH; j++) begin : g_fr
    fredkin_gate u_fr (
      .a(ctl[j]), .b(fill_in[j]), .c(wrap_in[j]),
      .p(ctl[j+1]), .q(sel_out[j]), .r(garbage_out[j])
    );
  end
endmodule
