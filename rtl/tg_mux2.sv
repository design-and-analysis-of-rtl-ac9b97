// tg_mux2: 2x1 multiplexer in the style of a transmission-gate mux.
//
// The cell is two transmission gates sharing an output node, plus one
// inverter that makes the complement of sel. One gate passes i0 while sel is
// low (its nMOS is driven by sel_n), the other passes i1 while sel is high.
// Exactly one gate conducts at any time, so the shared output is always
// driven; written as logic, the output is the OR of the two gated paths.
//
// Ports: i0, i1 data inputs; sel select (0 -> i0, 1 -> i1); y output.
// Timing: purely combinational, no clock.
//
// The structure (two gates and one inverter, six transistors) follows the
// source design. Which gate sits on sel and which on its complement is not
// stated there; sel=0 selecting i0 is chosen so that the 4x1 mux built from
// this cell selects i0 for control word 00, as the shifter truth tables need.
module tg_mux2 (
  input  logic i0,
  input  logic i1,
  input  logic sel,
  output logic y
);
  timeunit 1ns; timeprecision 1ps;

  logic sel_n;      // inverter output, gate control for the i0 path
  logic pass_i0;    // value passed by the gate enabled by sel_n
  logic pass_i1;    // value passed by the gate enabled by sel

  always_comb begin
    sel_n   = ~sel;
    pass_i0 = i0 & sel_n;
    pass_i1 = i1 & sel;
    y       = pass_i0 | pass_i1;
  end

endmodule
