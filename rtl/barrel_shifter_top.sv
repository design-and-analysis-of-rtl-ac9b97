// barrel_shifter_top: the three 4-bit barrel shifters side by side.
//
// The design offers three single-pass shifters, each a rank of four 4x1
// transmission-gate multiplexers: a left rotator, a right rotator and a
// bidirectional logical shifter. They are separate circuits, so each keeps
// its own operand, control word and result here; the top adds no logic.
//
// Ports (per shifter, prefix lrot_ / rrot_ / bidir_):
//   *_a[3:0]  operand a3..a0
//   *_s[1:0]  control word {s1,s0}
//   *_y[3:0]  result y3..y0
// Timing: purely combinational; every result follows its inputs in the same
// evaluation, with no clock and no state.
module barrel_shifter_top
  import shifter_pkg::*;
(
  input  word_t lrot_a,
  input  sel_t  lrot_s,
  output word_t lrot_y,

  input  word_t rrot_a,
  input  sel_t  rrot_s,
  output word_t rrot_y,

  input  word_t bidir_a,
  input  sel_t  bidir_s,
  output word_t bidir_y
);
  timeunit 1ns; timeprecision 1ps;

  barrel_left_rotator  u_left  (.a(lrot_a),  .s(lrot_s),  .y(lrot_y));
  barrel_right_rotator u_right (.a(rrot_a),  .s(rrot_s),  .y(rrot_y));
  barrel_bidir_shifter u_bidir (.a(bidir_a), .s(bidir_s), .y(bidir_y));

endmodule
