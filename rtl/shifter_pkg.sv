// shifter_pkg: widths and types shared by the 4-bit barrel shifter family.
//
// Every shifter in this family moves a 4-bit operand under a 2-bit control
// word {s1,s0} in one combinational pass through a single rank of 4x1
// multiplexers. The operand and control widths are fixed by the design (a
// 4-bit datapath, four 4x1 muxes per shifter); they are collected here so the
// modules and testbenches agree on them.
//
// The bidirectional shifter decodes its control word as: s1=0 no shift,
// {1,0} logical left shift by one, {1,1} logical right shift by one. The
// enum below names those three control words; the fourth code {0,1} is the
// second no-shift code.
package shifter_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned WIDTH = 4;  // operand width (a3..a0, y3..y0)
  localparam int unsigned SEL_W = 2;  // control word width (s1, s0)

  typedef logic [WIDTH-1:0] word_t;
  typedef logic [SEL_W-1:0] sel_t;

  // Control words of the bidirectional shifter.
  typedef enum logic [SEL_W-1:0] {
    BIDIR_PASS   = 2'b00,  // no shift (2'b01 also passes)
    BIDIR_PASS_1 = 2'b01,  // no shift
    BIDIR_LSL    = 2'b10,  // logical left shift by one, zero into y0
    BIDIR_LSR    = 2'b11   // logical right shift by one, zero into y3
  } bidir_op_e;

endpackage
