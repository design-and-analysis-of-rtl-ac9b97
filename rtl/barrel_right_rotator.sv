// barrel_right_rotator: 4-bit barrel rotator that rotates right.
//
// One 4x1 multiplexer per output bit. Input k of the mux for output y[i] is
// wired to a[(i+k) mod 4], and all four muxes share the control word {s1,s0}.
// Selecting input k rotates the word right by k places in a single pass, the
// bit leaving y0 re-entering at y3:
//   s = 00: y = a3 a2 a1 a0      s = 01: y = a0 a3 a2 a1
//   s = 10: y = a1 a0 a3 a2      s = 11: y = a2 a1 a0 a3
//
// Ports: a[3:0] operand, s[1:0] control word {s1,s0}, y[3:0] result.
// Timing: purely combinational, one rank of 4x1 muxes.
//
// The structure (four 4x1 transmission-gate muxes, 72 transistors) and the
// truth table follow the source design. The exact wire-to-pin assignment of
// its schematic is not legible and is derived here from the truth table.
module barrel_right_rotator
  import shifter_pkg::*;
(
  input  word_t a,
  input  sel_t  s,
  output word_t y
);
  timeunit 1ns; timeprecision 1ps;

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    tg_mux4 u_mux (
      .i0(a[i]),
      .i1(a[(i + 1) % 4]),
      .i2(a[(i + 2) % 4]),
      .i3(a[(i + 3) % 4]),
      .s1(s[1]),
      .s0(s[0]),
      .y (y[i])
    );
  end

endmodule
