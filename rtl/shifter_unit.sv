// shifter_unit - the shifter/rotation unit: K logarithmic stages that shift
// the word right by 0 .. 2^K - 1 positions, with the rotation unit between
// each stage's low bits and its vacated top positions.
//
// Stage I is controlled by s[K-1] and shifts by 2^(K-1), stage II by s[K-2]
// and 2^(K-2), and so on down to a shift of 1 under s[0]. Each stage m has
// its own rotation_unit slice of 2^(K-1-m) Fredkin gates; the rot control
// runs through the slices in stage order. Those gates decide whether the
// positions a stage vacates receive the fill bit (0, or the sign for an
// arithmetic shift) or the bits shifted out at the bottom (rotation). Fill
// bits come from the arithmetic right shift unit, stage I's first:
// fill_in[2^K - 2^(K-m) +: 2^(K-1-m)] belongs to stage m.
//
// Garbage outputs, LSB first: stage m's N+1 at [m*(N+1)], then the R outputs
// of the rotation slices in stage order, then the rot control leaving the
// last slice: K*(N+1) + 2^K in all. Combinational; with K = 3 and N = 8 it
// holds 24 Feynman and 31 Fredkin gates.
//
// Stage order, shift distances and gate counts follow the published design; the
// one-slice-per-stage split of the rotation unit is this implementation's.
module shifter_unit #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3
) (
  input  logic [N-1:0]               x_in,
  input  logic [K-1:0]               s,        // shift amount
  input  logic                       rot,
  input  logic [(1<<K)-2:0]          fill_in,
  output logic [N-1:0]               y_out,
  output logic [K*(N+1)+(1<<K)-1:0]  garbage_out
);
  localparam int unsigned NF   = (1 << K) - 1;
  localparam int unsigned GROT = K * (N + 1);  // first rotation garbage bit

  if (K == 0 || (1 << (K - 1)) >= N) begin : g_bad_k
    $error("shifter_unit: need 1 <= K and 2^(K-1) < N");
  end

  for (genvar m = 0; m < K; m++) begin : g_stage
    localparam int unsigned SH  = 1 << (K - 1 - m);
    localparam int unsigned OFF = (1 << K) - (1 << (K - m));

    logic [N-1:0]  d_in;
    logic [N-1:0]  d_out;
    logic          rot_i;
    logic          rot_o;
    logic [SH-1:0] wrap;
    logic [SH-1:0] top;

    if (m == 0) begin : g_first
      assign d_in  = x_in;
      assign rot_i = rot;
    end else begin : g_next
      assign d_in  = g_stage[m-1].d_out;
      assign rot_i = g_stage[m-1].rot_o;
    end

    rotation_unit #(.WIDTH(SH)) u_rot (
      .rot_in     (rot_i),
      .fill_in    (fill_in[OFF +: SH]),
      .wrap_in    (wrap),
      .sel_out    (top),
      .rot_out    (rot_o),
      .garbage_out(garbage_out[GROT + OFF +: SH])
    );

    shift_stage #(.N(N), .SHIFT(SH)) u_stage (
      .s_in       (s[K-1-m]),
      .x_in       (d_in),
      .top_in     (top),
      .wrap_out   (wrap),
      .y_out      (d_out),
      .garbage_out(garbage_out[m*(N+1) +: N+1])
    );
  end

  assign y_out                  = g_stage[K-1].d_out;
  assign garbage_out[GROT + NF] = g_stage[K-1].rot_o;
endmodule
