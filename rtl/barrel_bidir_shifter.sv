// barrel_bidir_shifter: 4-bit bidirectional logical shifter (one place).
//
// One 4x1 multiplexer per output bit, all sharing the control word {s1,s0}:
//   s = 00 or 01: y = a3 a2 a1 a0   no shift (mux inputs 0 and 1 both get a[i])
//   s = 10:       y = a2 a1 a0 0    logical left shift, zero into y0
//   s = 11:       y = 0  a3 a2 a1   logical right shift, zero into y3
// Mux input 2 of bit i is wired to a[i-1] and input 3 to a[i+1]; where that
// index falls off the word the input is tied to logic 0, which is where the
// vacated position is zero-filled. Nothing wraps around, unlike the rotators.
//
// Ports: a[3:0] operand, s[1:0] control word {s1,s0}, y[3:0] result.
// Timing: purely combinational, one rank of 4x1 muxes.
//
// The structure (four 4x1 transmission-gate muxes) and the truth table follow
// the source design. Feeding a[i] to both mux inputs 0 and 1 is this design's
// way of giving the two no-shift codes; the schematic's exact pin wiring is
// not legible.
module barrel_bidir_shifter
  import shifter_pkg::*;
(
  input  word_t a,
  input  sel_t  s,
  output word_t y
);
  timeunit 1ns; timeprecision 1ps;

  // Operand padded with a zero on each side: ext[j+1] = a[j], ext[0] and
  // ext[WIDTH+1] are the zero fill.
  logic [WIDTH+1:0] ext;
  assign ext = {1'b0, a, 1'b0};

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    tg_mux4 u_mux (
      .i0(ext[i + 1]),  // a[i]
      .i1(ext[i + 1]),  // a[i]
      .i2(ext[i]),      // a[i-1], or 0 at y0
      .i3(ext[i + 2]),  // a[i+1], or 0 at y3
      .s1(s[1]),
      .s0(s[0]),
      .y (y[i])
    );
  end

endmodule
