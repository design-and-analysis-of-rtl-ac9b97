// tg_mux4: 4x1 multiplexer built from three 2x1 transmission-gate muxes.
//
// Two first-level tg_mux2 cells, both steered by s0, pick one of (i0, i1)
// and one of (i2, i3). An output tg_mux2 steered by s1 then picks between the
// two. The result is y = i[{s1,s0}]: i0 for 00, i1 for 01, i2 for 10, i3 for
// 11. With six transistors per 2x1 cell the 4x1 mux is 18 transistors.
//
// Ports: i0..i3 data inputs; s1, s0 select; y output.
// Timing: purely combinational; the path is two 2x1 cells deep.
//
// The three-cell tree and the names i0..i3, s1, s0 follow the source design.
// The pairing of inputs in the first level (i0 with i1, i2 with i3) is the
// one that yields y = i[{s1,s0}], which the shifter truth tables rely on.
module tg_mux4 (
  input  logic i0,
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic s1,
  input  logic s0,
  output logic y
);
  timeunit 1ns; timeprecision 1ps;

  logic lo_y;  // i0 or i1, chosen by s0
  logic hi_y;  // i2 or i3, chosen by s0

  tg_mux2 u_mux_lo  (.i0(i0),   .i1(i1),   .sel(s0), .y(lo_y));
  tg_mux2 u_mux_hi  (.i0(i2),   .i1(i3),   .sel(s0), .y(hi_y));
  tg_mux2 u_mux_out (.i0(lo_y), .i1(hi_y), .sel(s1), .y(y));

endmodule
