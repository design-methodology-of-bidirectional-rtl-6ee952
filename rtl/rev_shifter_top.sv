// rev_shifter_top - the two reversible shifter designs side by side.
//
//   bidir_*  the (N,K) bidirectional arithmetic and logical barrel shifter
//            (default (8,3)): six operations selected by bidir_ctrl, shift
//            amount bidir_shamt, see rev_bidir_barrel_shifter
//   rot4_*   the (4,2) reversible left rotator, see rev_left_rotator_4x2
//
// The two are independent; each has its own ports, garbage outputs included,
// so that the reversible netlist stays complete. Purely combinational: the
// result is valid one propagation delay after the inputs change.
module rev_shifter_top
  import rbs_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3
) (
  input  logic [N-1:0]                 bidir_data_in,
  input  logic [K-1:0]                 bidir_shamt,
  input  ctrl_t                        bidir_ctrl,
  output logic [N-1:0]                 bidir_data_out,
  output logic [K*(N+1)+6+(1<<K)-2:0]  bidir_garbage,

  input  logic [3:0]                   rot4_data_in,
  input  logic [1:0]                   rot4_s,
  output logic [3:0]                   rot4_data_out,
  output logic [5:0]                   rot4_garbage
);
  rev_bidir_barrel_shifter #(.N(N), .K(K)) u_bidir (
    .data_in (bidir_data_in),
    .shamt   (bidir_shamt),
    .ctrl    (bidir_ctrl),
    .data_out(bidir_data_out),
    .garbage (bidir_garbage)
  );

  rev_left_rotator_4x2 u_rot4 (
    .data_in (rot4_data_in),
    .s       (rot4_s),
    .data_out(rot4_data_out),
    .garbage (rot4_garbage)
  );
endmodule
