// rev_bidir_barrel_shifter - (N,K) bidirectional arithmetic and logical
// barrel shifter built only from reversible Fredkin and Feynman gates.
//
// It shifts or rotates an N-bit word by 0 .. 2^K - 1 positions in either
// direction in one combinational pass. The six operations and their controls
// (see rbs_pkg::op_ctrl):
//   logical right  left0 rot0 sra0 sla0     logical left     left1 rot0 sra0 sla0
//   arith. right   left0 rot0 sra1 sla0     arith. left      left1 rot0 sra0 sla1
//   rotate right   left0 rot1 sra0 sla0     rotate left      left1 rot1 sra0 sla0
// An arithmetic left shift keeps the sign bit in the MSB and shifts the
// other bits left (for 3 positions: a7 a3 a2 a1 a0 0 0 0).
//
// Only right shifts are built. The word passes through six units:
//   data reversal unit I   reverses the word when left = 1
//   arith. right shift     makes the fill bit (sign if sra, else 0) and copies
//   shifter/rotation unit  K stages shifting right by 2^(K-1) .. 1, with the
//                          rotation unit choosing fill or wrapped bits
//   arith. left shift      puts the saved sign in bit 0 when sla = 1
//   data reversal unit II  reverses the word back when left = 1
// The arithmetic units tap their sign bits (bit N-1 and bit 0 of the
// reversed word) through Feynman gates before the shifter. The left control
// leaves unit I's last gate and drives unit II.
//
// Reversible-logic bookkeeping: every Fredkin/Feynman output that is not
// used is brought out on `garbage` (K*(N+1) + 6 + 2^K - 1 bits, 40 for the
// (8,3) shifter), every constant input is a 0 ancilla. For (8,3) the netlist
// holds 41 Fredkin and 32 Feynman gates with 33 ancilla inputs (quantum cost
// 237), matching the design's counts. Other control combinations than the
// six above are not defined by the published design; this RTL gives them the
// composition of the units above (see the README).
//
// garbage layout, LSB first: shifter unit (K*(N+1) + 2^K bits), arithmetic
// right shift unit (2), arithmetic left shift unit (2), left control out of
// reversal unit II (1).
module rev_bidir_barrel_shifter
  import rbs_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = 3
) (
  input  logic [N-1:0]                   data_in,
  input  logic [K-1:0]                   shamt,    // S_{K-1} .. S_0
  input  ctrl_t                          ctrl,
  output logic [N-1:0]                   data_out,
  output logic [K*(N+1)+6+(1<<K)-2:0]    garbage
);
  localparam int unsigned NF   = (1 << K) - 1;
  localparam int unsigned GSH  = K * (N + 1) + (1 << K);  // shifter unit garbage
  localparam int unsigned GTOT = K * (N + 1) + 6 + NF;

  logic          left_c;      // left control, from reversal unit I to II
  logic [N-1:0]  rev_word;    // output of reversal unit I
  logic [N-1:0]  sh_in;       // word entering the shifter
  logic [N-1:0]  sh_out;      // shifter output
  logic [N-1:0]  pre_rev;     // word entering reversal unit II
  logic [NF-1:0] fill;

  data_reversal_unit #(.N(N)) u_drcu1 (
    .ctl_in (ctrl.left),
    .d_in   (data_in),
    .d_out  (rev_word),
    .ctl_out(left_c)
  );

  ars_control_unit #(.K(K)) u_arscu (
    .sra        (ctrl.sra),
    .msb_in     (rev_word[N-1]),
    .msb_out    (sh_in[N-1]),
    .fill_out   (fill),
    .garbage_out(garbage[GSH +: 2])
  );

  assign sh_in[N-2:1] = rev_word[N-2:1];

  shifter_unit #(.N(N), .K(K)) u_shift (
    .x_in       (sh_in),
    .s          (shamt),
    .rot        (ctrl.rot),
    .fill_in    (fill),
    .y_out      (sh_out),
    .garbage_out(garbage[GSH-1:0])
  );

  als_control_unit u_alscu (
    .sla        (ctrl.sla),
    .sign_in    (rev_word[0]),
    .sign_out   (sh_in[0]),
    .lsb_in     (sh_out[0]),
    .lsb_out    (pre_rev[0]),
    .garbage_out(garbage[GSH+2 +: 2])
  );

  assign pre_rev[N-1:1] = sh_out[N-1:1];

  data_reversal_unit #(.N(N)) u_drcu2 (
    .ctl_in (left_c),
    .d_in   (pre_rev),
    .d_out  (data_out),
    .ctl_out(garbage[GTOT-1])
  );
endmodule
